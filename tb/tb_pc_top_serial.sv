// End-to-end test of pc_top with every unit loaded serially: the adder one
// LUT at a time, the comparator through one 256-bit configuration chain, and
// the mux built on the modified slice (six-input LUT RAM, written by address)
// one LUT at a time. Same checks and mechanism counts as tb_pc_top; the load
// times become 22*16 + 1, 8*32 + 1 and 6*64 + 1 clocks.
module tb_pc_top_serial;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  // must match the parameters pc_top is built with below
  localparam int ADD_W = 32, ADD_NLUT = 22, ADD_LANES = 1, ADD_LEN = 16;
  localparam int CMP_W = 32, CMP_NLUT = 8, CMP_LANES = 1, CMP_LEN = 32;
  localparam int MUX_N = 32;
  localparam arch_e MUX_A = ARCH_MODIFIED;
  localparam int MUX_K = (MUX_A == ARCH_MODIFIED) ? 6 : 5;
  localparam int MUX_NLUT = (MUX_N + MUX_K - 1) / MUX_K;
  localparam int MUX_LANES = 1;
  localparam int MUX_LEN = (MUX_A == ARCH_MODIFIED) ? 64 : 32;
  localparam lut_mode_e MUX_MODE = (MUX_A == ARCH_MODIFIED) ? LUT_RAM64 : LUT_SRL32;
  localparam int ADD_P = ADD_NLUT / ADD_LANES, CMP_P = CMP_NLUT / CMP_LANES;
  localparam int MUX_P = MUX_NLUT / MUX_LANES;
  localparam int ADD_AW = $clog2(2 * ADD_P * ADD_LEN), CMP_AW = $clog2(2 * CMP_P * CMP_LEN);
  localparam int MUX_AW = $clog2(MUX_N * MUX_P * MUX_LEN);

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  logic rst_n;
  logic add_st_we; logic [ADD_AW-1:0] add_st_addr; logic [ADD_LANES*2-1:0] add_st_data;
  logic add_inval; logic add_inval_val; logic add_busy, add_ready; logic add_cur_val;
  logic [ADD_W-1:0] add_a, add_y; logic add_cin, add_cout;
  logic cmp_st_we; logic [CMP_AW-1:0] cmp_st_addr; logic [CMP_LANES-1:0] cmp_st_data;
  logic cmp_inval; logic cmp_inval_val; logic cmp_busy, cmp_ready; logic cmp_cur_val;
  logic [CMP_W-1:0] cmp_a; logic cmp_gt;
  logic mux_st_we; logic [MUX_AW-1:0] mux_st_addr; logic [MUX_LANES-1:0] mux_st_data;
  logic mux_inval; logic [4:0] mux_inval_val; logic mux_busy, mux_ready; logic [4:0] mux_cur_val;
  logic [MUX_N-1:0] mux_d; logic mux_y;
  logic m42_st_we; logic [7:0] m42_st_addr; logic [1:0] m42_st_data;
  logic m42_inval; logic [3:0] m42_inval_val; logic m42_busy, m42_ready; logic [3:0] m42_cur_val;
  logic [3:0] m42_d; logic [1:0] m42_y;

  pc_top #(.ADD_LANES(ADD_LANES), .CMP_CHAIN(1'b1), .CMP_LANES(CMP_LANES), .MUX_LANES(MUX_LANES),
           .MUX_ARCH(MUX_A)) dut (.*);

  // pseudo-constant values held in the stores
  logic [ADD_W-1:0] add_b [2];
  logic [CMP_W-1:0] cmp_c [2];

  // mechanism counters
  int n_m42_inval = 0, n_add_inval = 0, n_cmp_inval = 0, n_mux_inval = 0, n_restart = 0, n_switch = 0;
  int n_carry = 0, n_gt = 0, n_le = 0;
  bit mux_seen [MUX_N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- store loading (the offline bitfiles) ----
  task automatic fill_stores();
    logic [ADD_LANES*2-1:0] aw;
    logic [CMP_LANES-1:0]   cw;
    logic [MUX_LANES-1:0]   mw;
    for (int v = 0; v < 2; v++)
      for (int p = 0; p < ADD_P; p++)
        for (int c = 0; c < ADD_LEN; c++) begin
          for (int l = 0; l < ADD_LANES; l++)
            aw[2*l +: 2] = cfg_bits(LUT_SRL16X2, adder_tab(96'(add_b[v]), p*ADD_LANES + l), c);
          @(negedge clk);
          add_st_we = 1; add_st_addr = ADD_AW'((v*ADD_P + p)*ADD_LEN + c); add_st_data = aw;
        end
    // comparator: one chain of 8 x 32 bits, top LUT's table first
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < CMP_NLUT*CMP_LEN; c++) begin
        int g = CMP_NLUT*CMP_LEN - 1 - c;
        cw = CMP_LANES'(cmp_tab(64'(cmp_c[v]), g / CMP_LEN).t6[g % CMP_LEN]);
        @(negedge clk);
        cmp_st_we = 1; cmp_st_addr = CMP_AW'(v*CMP_NLUT*CMP_LEN + c); cmp_st_data = cw;
      end
    for (int v = 0; v < MUX_N; v++)
      for (int p = 0; p < MUX_P; p++)
        for (int c = 0; c < MUX_LEN; c++) begin
          for (int l = 0; l < MUX_LANES; l++)
            mw[l] = cfg_bits(MUX_MODE, mux_tab(v, MUX_K, p*MUX_LANES + l), c)[0];
          @(negedge clk);
          mux_st_we = 1; mux_st_addr = MUX_AW'((v*MUX_P + p)*MUX_LEN + c); mux_st_data = mw;
        end
    for (int v = 0; v < 16; v++)
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        m42_st_we = 1; m42_st_addr = 8'(v*16 + c); m42_st_data = cfg_bits(LUT_SRL16X2, mux4x2_tab(v), c);
      end
    @(negedge clk);
    add_st_we = 0; cmp_st_we = 0; mux_st_we = 0; m42_st_we = 0;
  endtask

  // ---- one invalidation per unit, with load-time check ----
  task automatic inval_add(int v);
    int t0;
    @(negedge clk);
    if (add_ready && add_cur_val != 1'(v)) n_switch++;
    add_inval = 1; add_inval_val = 1'(v);
    @(negedge clk);
    add_inval = 0; t0 = cycle;
    check(add_busy && !add_ready, "adder busy during load");
    while (!add_ready) @(negedge clk);
    check(cycle - t0 == ADD_P*ADD_LEN + 1, $sformatf("adder load time %0d", cycle - t0));
    check(add_cur_val == 1'(v), "adder value loaded");
    n_add_inval++;
  endtask

  task automatic inval_cmp(int v);
    int t0;
    @(negedge clk);
    if (cmp_ready && cmp_cur_val != 1'(v)) n_switch++;
    cmp_inval = 1; cmp_inval_val = 1'(v);
    @(negedge clk);
    cmp_inval = 0; t0 = cycle;
    while (!cmp_ready) @(negedge clk);
    check(cycle - t0 == CMP_P*CMP_LEN + 1, $sformatf("comparator load time %0d", cycle - t0));
    check(cmp_cur_val == 1'(v), "comparator value loaded");
    n_cmp_inval++;
  endtask

  task automatic inval_mux(int v, bit restart);
    int t0;
    @(negedge clk);
    if (mux_ready && mux_cur_val != 5'(v)) n_switch++;
    mux_inval = 1; mux_inval_val = restart ? 5'(v + 7) : 5'(v);
    @(negedge clk);
    mux_inval = 0;
    if (restart) begin
      repeat (5) @(negedge clk);
      if (mux_busy) n_restart++;
      mux_inval = 1; mux_inval_val = 5'(v);
      @(negedge clk);
      mux_inval = 0;
    end
    t0 = cycle;
    while (!mux_ready) @(negedge clk);
    check(cycle - t0 == MUX_P*MUX_LEN + 1, $sformatf("mux load time %0d", cycle - t0));
    check(mux_cur_val == 5'(v), "mux value loaded");
    n_mux_inval++;
  endtask

  task automatic run_m42(int v);
    int t0;
    @(negedge clk);
    m42_inval = 1; m42_inval_val = 4'(v);
    @(negedge clk);
    m42_inval = 0; t0 = cycle;
    while (!m42_ready) @(negedge clk);
    check(cycle - t0 == 16 + 1, $sformatf("selector load time %0d", cycle - t0));
    n_m42_inval++;
    for (int x = 0; x < 16; x++) begin
      m42_d = 4'(x);
      #1;
      check(m42_y == {m42_d[v / 4], m42_d[v % 4]}, $sformatf("selector v=%0d d=%b", v, m42_d));
      @(negedge clk);
    end
  endtask

  task automatic run_add(int v, int n);
    for (int i = 0; i < n; i++) begin
      logic [ADD_W:0] exp;
      add_a = (i == 0) ? ~add_b[v] : ADD_W'($urandom);
      add_cin = (i == 0) ? 1'b1 : 1'($urandom);
      #1;
      exp = (ADD_W+1)'(add_a) + (ADD_W+1)'(add_b[v]) + (ADD_W+1)'(add_cin);
      check({add_cout, add_y} == exp, $sformatf("add a=%h B=%h", add_a, add_b[v]));
      if (add_cout) n_carry++;
      @(negedge clk);
    end
  endtask

  task automatic run_cmp(int v, int n);
    for (int i = 0; i < n; i++) begin
      cmp_a = (i == 0) ? cmp_c[v] : (i == 1) ? cmp_c[v] + 1 : CMP_W'($urandom);
      #1;
      check(cmp_gt == (cmp_a > cmp_c[v]), $sformatf("cmp a=%h C=%h", cmp_a, cmp_c[v]));
      if (cmp_gt) n_gt++; else n_le++;
      @(negedge clk);
    end
  endtask

  task automatic run_mux(int s, int n);
    for (int i = 0; i < n; i++) begin
      mux_d = (i == 0) ? (MUX_N'(1) << s) : (i == 1) ? ~(MUX_N'(1) << s) : MUX_N'($urandom);
      #1;
      check(mux_y == mux_d[s], $sformatf("mux s=%0d", s));
      mux_seen[s] = 1;
      @(negedge clk);
    end
  endtask

  initial begin
    int n_mux_sel;
    rst_n = 0;
    add_st_we = 0; add_st_addr = '0; add_st_data = '0; add_inval = 0; add_inval_val = 0;
    add_a = '0; add_cin = 0;
    cmp_st_we = 0; cmp_st_addr = '0; cmp_st_data = '0; cmp_inval = 0; cmp_inval_val = 0;
    cmp_a = '0;
    mux_st_we = 0; mux_st_addr = '0; mux_st_data = '0; mux_inval = 0; mux_inval_val = '0;
    mux_d = '0;
    m42_st_we = 0; m42_st_addr = '0; m42_st_data = '0; m42_inval = 0; m42_inval_val = '0; m42_d = '0;
    add_b[0] = ADD_W'($urandom); add_b[1] = '1;
    cmp_c[0] = CMP_W'($urandom); cmp_c[1] = CMP_W'(32'h0000_ffff);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!add_ready && !cmp_ready && !mux_ready, "nothing ready before the first load");
    fill_stores();
    for (int r = 0; r < 4; r++) begin
      inval_add(r % 2);  run_add(r % 2, 200);
      inval_cmp(r % 2);  run_cmp(r % 2, 200);
    end
    for (int s = 0; s < MUX_N; s++) begin
      inval_mux(s, s == 3);
      run_mux(s, 20);
    end
    for (int v = 0; v < 16; v++) run_m42(v);
    n_mux_sel = 0;
    foreach (mux_seen[s]) if (mux_seen[s]) n_mux_sel++;
    $display("invalidations: adder %0d, comparator %0d, mux %0d, selector %0d; restarts %0d, value switches %0d",
             n_add_inval, n_cmp_inval, n_mux_inval, n_m42_inval, n_restart, n_switch);
    $display("adder carry outs %0d, comparator true %0d false %0d, mux selects covered %0d",
             n_carry, n_gt, n_le, n_mux_sel);
    check(n_add_inval > 0 && n_cmp_inval > 0 && n_mux_inval > 0 && n_m42_inval == 16,
          "every unit invalidated");
    check(n_restart > 0, "a load was restarted");
    check(n_switch > 0, "a pseudo-constant value was switched");
    check(n_carry > 0, "adder carry out occurred");
    check(n_gt > 0 && n_le > 0, "comparator gave both answers");
    check(n_mux_sel == MUX_N, "every mux select exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
