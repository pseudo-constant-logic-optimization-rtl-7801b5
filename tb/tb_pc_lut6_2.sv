// Self-checking test of pc_lut6_2 in its three modes. Random truth tables are
// loaded through the RAM write port or the shift inputs, then every read
// address is applied and O6/O5 compared with the table; the SRL32 shift-out
// is checked against the bit that must leave the chain.
module tb_pc_lut6_2;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0] we;
  logic [5:0] a, wa;
  logic [2:0] di, si1;
  logic [2:0] o6, o5, so;
  lut_mode_e  modes [3] = '{LUT_RAM64, LUT_SRL32, LUT_SRL16X2};

  pc_lut6_2 #(.MODE(LUT_RAM64))   u_ram (.clk, .we(we[0]), .a, .wa, .di(di[0]), .si1(si1[0]),
                                         .o6(o6[0]), .o5(o5[0]), .so(so[0]));
  pc_lut6_2 #(.MODE(LUT_SRL32))   u_s32 (.clk, .we(we[1]), .a, .wa, .di(di[1]), .si1(si1[1]),
                                         .o6(o6[1]), .o5(o5[1]), .so(so[1]));
  pc_lut6_2 #(.MODE(LUT_SRL16X2)) u_s16 (.clk, .we(we[2]), .a, .wa, .di(di[2]), .si1(si1[2]),
                                         .o6(o6[2]), .o5(o5[2]), .so(so[2]));

  tab_t tabs [3];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; a = '0; wa = '0; di = '0; si1 = '0;
    for (int round = 0; round < 4; round++) begin
      for (int m = 0; m < 3; m++) tabs[m] = {$urandom, $urandom, $urandom, $urandom};
      // load all three: RAM 64 clocks, SRL32 32 clocks, SRL16x2 16 clocks
      for (int c = 0; c < 64; c++) begin
        @(negedge clk);
        wa = 6'(c);
        we = {c < 16, c < 32, 1'b1};
        {di[0], si1[0]} = {cfg_bits(LUT_RAM64, tabs[0], c)[0], 1'b0};
        si1[1] = (c < 32) ? cfg_bits(LUT_SRL32, tabs[1], c)[0] : 1'b0;
        di[1]  = 1'b0;
        {di[2], si1[2]} = (c < 16) ? cfg_bits(LUT_SRL16X2, tabs[2], c) : 2'b00;
      end
      @(negedge clk);
      we = '0;
      for (int x = 0; x < 64; x++) begin
        a = 6'(x);
        #1;
        for (int m = 0; m < 3; m++) begin
          logic [1:0] exp;
          exp = tab_read(modes[m], tabs[m], a);
          check(o6[m] == exp[0] && o5[m] == exp[1],
                $sformatf("mode %0d addr %0d o6=%b o5=%b exp=%b", m, x, o6[m], o5[m], exp));
        end
      end
      // SRL32 shift-out is the oldest bit: table index 31
      check(so[1] == tabs[1].t6[31], "srl32 shift-out");
      // one more shift moves everything up by one place
      @(negedge clk);
      we = 3'b010; si1[1] = 1'b1;
      @(negedge clk);
      we = '0;
      check(so[1] == tabs[1].t6[30], "srl32 shift-out after shift");
      a = 6'd0; #1;
      check(o6[1] == 1'b1, "srl32 new bit at index 0");
      a = 6'd5; #1;
      check(o6[1] == tabs[1].t6[4], "srl32 index 5 after shift");
      // a cleared write enable must hold the table
      @(negedge clk);
      we = '0; di = '1; si1 = '1; wa = 6'd3;
      @(negedge clk);
      a = 6'd3; #1;
      check(o6[0] == tabs[0].t6[3], "ram holds without we");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
