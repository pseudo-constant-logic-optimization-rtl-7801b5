// Self-checking test of pc_mux4x2: for all 16 select pairs (s0, s1) the two
// tables are shifted in (16 clocks) and every data pattern is checked
// against y = {d[s1], d[s0]}.
module tb_pc_mux4x2;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cfg_we;
  logic [1:0] cfg_d, y;
  logic [3:0] d;

  pc_mux4x2 dut (.clk, .cfg_we, .cfg_d, .d, .y);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_d = '0; d = '0;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        cfg_we = 1;
        cfg_d = cfg_bits(LUT_SRL16X2, mux4x2_tab(v), c);
      end
      @(negedge clk);
      cfg_we = 0;
      for (int x = 0; x < 16; x++) begin
        d = 4'(x);
        #1;
        checks++;
        if (y !== {d[v / 4], d[v % 4]}) begin
          failures++;
          $display("FAIL s0=%0d s1=%0d d=%b y=%b", v % 4, v / 4, d, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
