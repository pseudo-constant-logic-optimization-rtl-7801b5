// Self-checking test of pc_lutram_slice on both fabrics. On the stock slice
// the write address must come from LUT D's inputs and LUTs A-C must then
// compute their loaded functions; LUT D only returns what sits at its own
// address. On the modified slice the write address comes from the extra pins
// and all four LUTs compute their loaded functions.
module tb_pc_lutram_slice;
  import pc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]      we_v5, we_m, di_v5, di_m, o6_v5, o5_v5, o6_m, o5_m;
  logic [3:0][5:0] a_v5, a_m;
  logic [5:0]      wa_v5, wa_m;
  logic [63:0]     tv5 [4], tm [4];

  pc_lutram_slice #(.ARCH(ARCH_V5)) u_v5 (.clk, .we(we_v5), .a(a_v5), .wa(wa_v5), .di(di_v5),
                                          .o6(o6_v5), .o5(o5_v5));
  pc_lutram_slice #(.ARCH(ARCH_MODIFIED)) u_m (.clk, .we(we_m), .a(a_m), .wa(wa_m), .di(di_m),
                                               .o6(o6_m), .o5(o5_m));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_v5 = '0; we_m = '0; di_v5 = '0; di_m = '0; a_v5 = '0; a_m = '0;
    wa_v5 = 6'h2a; wa_m = '0;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 4; i++) begin
        tv5[i] = {$urandom, $urandom};
        tm[i]  = {$urandom, $urandom};
      end
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        we_v5 = 4'b0111;                 // LUT D is not written on the stock slice
        we_m  = 4'b1111;
        a_v5[3] = 6'(c);                 // write address on LUT D's inputs
        a_v5[0] = 6'($urandom); a_v5[1] = 6'($urandom); a_v5[2] = 6'($urandom);
        wa_m  = 6'(c);                   // write address on the extra pins
        a_m   = {$urandom, $urandom};    // must not matter
        for (int i = 0; i < 4; i++) begin
          di_v5[i] = tv5[i][c];
          di_m[i]  = tm[i][c];
        end
      end
      @(negedge clk);
      we_v5 = '0; we_m = '0;
      for (int n = 0; n < 200; n++) begin
        a_v5 = {$urandom, $urandom}; a_m = {$urandom, $urandom};
        #1;
        for (int i = 0; i < 3; i++) begin
          check(o6_v5[i] == tv5[i][a_v5[i]], $sformatf("v5 lut %0d o6", i));
          check(o5_v5[i] == tv5[i][{1'b0, a_v5[i][4:0]}], $sformatf("v5 lut %0d o5", i));
        end
        for (int i = 0; i < 4; i++) begin
          check(o6_m[i] == tm[i][a_m[i]], $sformatf("mod lut %0d o6", i));
          check(o5_m[i] == tm[i][{1'b0, a_m[i][4:0]}], $sformatf("mod lut %0d o5", i));
        end
      end
      // stock slice: one write whose address is driven on LUT D lands there
      @(negedge clk);
      a_v5[3] = 6'd17; we_v5 = 4'b0001; di_v5 = 4'b0001 ^ {3'b0, tv5[0][17]};
      @(negedge clk);
      we_v5 = '0; tv5[0][17] = ~tv5[0][17];
      a_v5[0] = 6'd17; #1;
      check(o6_v5[0] == tv5[0][17], "v5 write address taken from LUT D inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
