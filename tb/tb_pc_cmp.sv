// Self-checking test of the 32-bit pseudo-constant comparator (8 LUTs).
// For several thresholds B the LUTs are loaded (32 clocks) and gt is
// compared with a > B for random operands and for a = B, B - 1, B + 1 and
// operands equal to B except in one group of four bits. A second instance
// loads the same tables through one 256-bit configuration chain.
module tb_pc_cmp;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  localparam int W = 32;
  localparam int NLUT = (W + 3) / 4;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NLUT-1:0] cfg_we, cfg_d;
  logic [W-1:0]    a;
  logic            gt, gt_ch;
  logic [NLUT-1:0] ch_we, ch_d;

  pc_cmp dut (.clk, .cfg_we, .cfg_d, .a, .gt);
  pc_cmp #(.CFG_CHAIN(1'b1)) dut_ch (.clk, .cfg_we(ch_we), .cfg_d(ch_d), .a, .gt(gt_ch));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(logic [W-1:0] b);
    for (int c = 0; c < 32*NLUT; c++) begin
      int g = 32*NLUT - 1 - c;   // chain position this clock's bit ends at
      @(negedge clk);
      cfg_we = (c < 32) ? '1 : '0;
      for (int j = 0; j < NLUT; j++)
        cfg_d[j] = (c < 32) ? cfg_bits(LUT_SRL32, cmp_tab(64'(b), j), c)[0] : 1'b0;
      ch_we = NLUT'(1);
      ch_d  = NLUT'(cmp_tab(64'(b), g / 32).t6[g % 32]);
    end
    @(negedge clk);
    cfg_we = '0; ch_we = '0;
  endtask

  task automatic try(logic [W-1:0] b, logic [W-1:0] av);
    a = av;
    #1;
    checks += 2;
    if (gt !== (av > b)) begin
      failures++;
      if (failures < 10) $display("FAIL b=%h a=%h gt=%0d", b, av, gt);
    end
    if (gt_ch !== (av > b)) begin
      failures++;
      if (failures < 10) $display("FAIL chained b=%h a=%h gt=%0d", b, av, gt_ch);
    end
  endtask

  initial begin
    logic [W-1:0] bs [5];
    cfg_we = '0; cfg_d = '0; a = '0; ch_we = '0; ch_d = '0;
    bs = '{32'h0, 32'hffff_ffff, 32'h1234_5678, 32'($urandom), 32'($urandom)};
    foreach (bs[i]) begin
      load(bs[i]);
      try(bs[i], bs[i]);
      try(bs[i], bs[i] + 1);
      try(bs[i], bs[i] - 1);
      for (int g = 0; g < NLUT; g++) begin
        try(bs[i], bs[i] ^ (W'(32'h1) << (4*g)));
        try(bs[i], bs[i] ^ (W'(32'h8) << (4*g)));
      end
      for (int n = 0; n < 300; n++) try(bs[i], 32'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
