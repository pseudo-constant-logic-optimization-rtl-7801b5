// Workload test: operations between invalidations, swept from 1 to 1024, for
// the four mux configurations of the density study (stock and modified
// fabric, fully parallel and fully serial loading), with the 32-bit adder
// swept alongside in each. Every result is checked and every load time must
// be PHASES*LEN + 1 clocks for its unit. The printed load and operating
// clocks are the inputs of the area-time (functional density) trade-off.
module tb_pc_invalidation_sweep;
  import pc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [3:0] done;
  int c [4], f [4];

  pc_sweep_unit #(.MUX_ARCH(ARCH_V5),       .SERIAL(1'b0)) u_v5_par  (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  pc_sweep_unit #(.MUX_ARCH(ARCH_V5),       .SERIAL(1'b1)) u_v5_ser  (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  pc_sweep_unit #(.MUX_ARCH(ARCH_MODIFIED), .SERIAL(1'b0)) u_mod_par (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  pc_sweep_unit #(.MUX_ARCH(ARCH_MODIFIED), .SERIAL(1'b1)) u_mod_ser (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
