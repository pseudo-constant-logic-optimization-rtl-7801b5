// Self-checking test of pc_adder3: for every 3-bit pseudo-constant b the
// four tables are shifted in (16 clocks), then all 16 combinations of a and
// cin are applied and {cout, s} compared with a + b + cin.
module tb_pc_adder3;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]      cfg_we;
  logic [1:0][1:0] cfg_d;
  logic [2:0]      a, s;
  logic            cin, cout;

  pc_adder3 dut (.clk, .cfg_we, .cfg_d, .a, .cin, .s, .cout);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = '0; cfg_d = '0; a = '0; cin = 0;
    for (int b = 0; b < 8; b++) begin
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        cfg_we = 2'b11;
        for (int j = 0; j < 2; j++) cfg_d[j] = cfg_bits(LUT_SRL16X2, adder_tab(96'(b), j), c);
      end
      @(negedge clk);
      cfg_we = '0;
      for (int x = 0; x < 16; x++) begin
        logic [3:0] exp;
        {cin, a} = 4'(x);
        #1;
        exp = 4'(a) + 4'(b) + 4'(cin);
        checks++;
        if ({cout, s} !== exp) begin
          failures++;
          $display("FAIL b=%0d a=%0d cin=%0d got %0d exp %0d", b, a, cin, {cout, s}, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
