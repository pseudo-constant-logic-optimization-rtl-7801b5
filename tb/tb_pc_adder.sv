// Self-checking test of the 32-bit pseudo-constant adder (22 LUTs). For
// several pseudo-constants B, including all-ones to force a carry through the
// whole chain, all 22 LUTs are loaded in parallel (16 clocks) and random and
// corner-case operands are checked against a + B + cin, carry out included.
module tb_pc_adder;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  localparam int W = 32;
  localparam int NLUT = 2 * ((W + 2) / 3);

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NLUT-1:0]      cfg_we;
  logic [NLUT-1:0][1:0] cfg_d;
  logic [W-1:0]         a, y;
  logic                 cin, cout;

  pc_adder dut (.clk, .cfg_we, .cfg_d, .a, .cin, .y, .cout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(logic [W-1:0] b);
    for (int c = 0; c < 16; c++) begin
      @(negedge clk);
      cfg_we = '1;
      for (int j = 0; j < NLUT; j++) cfg_d[j] = cfg_bits(LUT_SRL16X2, adder_tab(96'(b), j), c);
    end
    @(negedge clk);
    cfg_we = '0;
  endtask

  task automatic try(logic [W-1:0] b, logic [W-1:0] av, logic ci);
    logic [W:0] exp;
    a = av; cin = ci;
    #1;
    exp = (W+1)'(av) + (W+1)'(b) + (W+1)'(ci);
    checks++;
    if ({cout, y} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL b=%h a=%h cin=%0d got %h exp %h", b, av, ci, {cout, y}, exp);
    end
  endtask

  initial begin
    logic [W-1:0] bs [6];
    cfg_we = '0; cfg_d = '0; a = '0; cin = 0;
    bs = '{32'h0, 32'hffff_ffff, 32'h1, 32'h8000_0000, 32'($urandom), 32'($urandom)};
    foreach (bs[i]) begin
      load(bs[i]);
      try(bs[i], 32'h0, 1'b0);
      try(bs[i], 32'h0, 1'b1);
      try(bs[i], 32'hffff_ffff, 1'b1);
      try(bs[i], ~bs[i], 1'b1);     // carry ripples through every bit
      try(bs[i], ~bs[i], 1'b0);
      for (int n = 0; n < 300; n++) try(bs[i], 32'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
