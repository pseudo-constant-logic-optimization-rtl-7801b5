// Testbench helper: one pc_top in a given mux fabric and loading mode, driven
// through a sweep of "operations between invalidations". For n = 1, 2, 4, ...
// 2^MAXK it invalidates the mux (new random select) and the adder (other
// stored value), waits for the load, checks the load time, then performs n
// operations on each, checking every result. It reports, per n, the clocks
// each unit spent loading against the clocks spent operating. The comparator and the
// selector are tied off. done rises when the sweep has finished.
module pc_sweep_unit
  import pc_pkg::*;
  import pc_tb_pkg::*;
#(
  parameter arch_e MUX_ARCH  = ARCH_V5,
  parameter bit    SERIAL    = 1'b0,
  parameter int    MAXK      = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int MUX_N = 32;
  localparam int MUX_K = (MUX_ARCH == ARCH_MODIFIED) ? 6 : 5;
  localparam int MUX_NLUT = (MUX_N + MUX_K - 1) / MUX_K;
  localparam int MUX_LANES = SERIAL ? 1 : MUX_NLUT;
  localparam int MUX_LEN = (MUX_ARCH == ARCH_MODIFIED) ? 64 : 32;
  localparam lut_mode_e MUX_MODE = (MUX_ARCH == ARCH_MODIFIED) ? LUT_RAM64 : LUT_SRL32;
  localparam int MUX_P = MUX_NLUT / MUX_LANES;
  localparam int MUX_AW = $clog2(MUX_N * MUX_P * MUX_LEN);
  localparam int ADD_NLUT = 22, ADD_LEN = 16;
  localparam int ADD_LANES = SERIAL ? 1 : ADD_NLUT;
  localparam int ADD_P = ADD_NLUT / ADD_LANES;
  localparam int ADD_AW = $clog2(2 * ADD_P * ADD_LEN);
  localparam int CMP_LANES = SERIAL ? 1 : 8;
  localparam int CMP_AW = $clog2(2 * (8 / CMP_LANES) * 32);

  logic add_st_we; logic [ADD_AW-1:0] add_st_addr; logic [ADD_LANES*2-1:0] add_st_data;
  logic add_inval, add_inval_val, add_busy, add_ready, add_cur_val;
  logic [31:0] add_a, add_y; logic add_cin, add_cout;
  logic cmp_busy, cmp_ready, cmp_cur_val, cmp_gt;
  logic mux_st_we; logic [MUX_AW-1:0] mux_st_addr; logic [MUX_LANES-1:0] mux_st_data;
  logic mux_inval; logic [4:0] mux_inval_val; logic mux_busy, mux_ready; logic [4:0] mux_cur_val;
  logic [31:0] mux_d; logic mux_y;
  logic m42_busy, m42_ready; logic [3:0] m42_cur_val; logic [1:0] m42_y;

  pc_top #(.ADD_LANES(ADD_LANES), .CMP_LANES(CMP_LANES), .MUX_ARCH(MUX_ARCH),
           .MUX_LANES(MUX_LANES)) dut (
    .clk, .rst_n,
    .add_st_we, .add_st_addr, .add_st_data, .add_inval, .add_inval_val, .add_busy, .add_ready,
    .add_cur_val, .add_a, .add_cin, .add_y, .add_cout,
    .cmp_st_we(1'b0), .cmp_st_addr('0), .cmp_st_data('0), .cmp_inval(1'b0), .cmp_inval_val(1'b0),
    .cmp_busy, .cmp_ready, .cmp_cur_val, .cmp_a('0), .cmp_gt,
    .mux_st_we, .mux_st_addr, .mux_st_data, .mux_inval, .mux_inval_val, .mux_busy, .mux_ready,
    .mux_cur_val, .mux_d, .mux_y,
    .m42_st_we(1'b0), .m42_st_addr('0), .m42_st_data('0), .m42_inval(1'b0), .m42_inval_val('0),
    .m42_busy, .m42_ready, .m42_cur_val, .m42_d('0), .m42_y
  );

  logic [31:0] add_b [2];
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %m %s", what); end
  endtask

  initial begin
    logic [ADD_LANES*2-1:0] aw;
    logic [MUX_LANES-1:0]   mw;
    done = 0; checks = 0; failures = 0;
    add_st_we = 0; add_st_addr = '0; add_st_data = '0; add_inval = 0; add_inval_val = 0;
    add_a = '0; add_cin = 0;
    mux_st_we = 0; mux_st_addr = '0; mux_st_data = '0; mux_inval = 0; mux_inval_val = '0;
    mux_d = '0;
    add_b[0] = $urandom; add_b[1] = $urandom;
    @(posedge rst_n);
    // offline bitfiles into the stores
    for (int v = 0; v < 2; v++)
      for (int p = 0; p < ADD_P; p++)
        for (int c = 0; c < ADD_LEN; c++) begin
          for (int l = 0; l < ADD_LANES; l++)
            aw[2*l +: 2] = cfg_bits(LUT_SRL16X2, adder_tab(96'(add_b[v]), p*ADD_LANES + l), c);
          @(negedge clk);
          add_st_we = 1; add_st_addr = ADD_AW'((v*ADD_P + p)*ADD_LEN + c); add_st_data = aw;
        end
    for (int v = 0; v < MUX_N; v++)
      for (int p = 0; p < MUX_P; p++)
        for (int c = 0; c < MUX_LEN; c++) begin
          for (int l = 0; l < MUX_LANES; l++)
            mw[l] = cfg_bits(MUX_MODE, mux_tab(v, MUX_K, p*MUX_LANES + l), c)[0];
          @(negedge clk);
          mux_st_we = 1; mux_st_addr = MUX_AW'((v*MUX_P + p)*MUX_LEN + c); mux_st_data = mw;
        end
    @(negedge clk);
    add_st_we = 0; mux_st_we = 0;
    // the sweep
    for (int k = 0; k <= MAXK; k++) begin
      int n, s, t0, t_mux, t_add, t_ops;
      n = 1 << k;
      s = $urandom_range(MUX_N - 1);
      @(negedge clk);
      mux_inval = 1; mux_inval_val = 5'(s);
      add_inval = 1; add_inval_val = 1'(k % 2);
      @(negedge clk);
      mux_inval = 0; add_inval = 0; t0 = cycle;
      t_mux = -1; t_add = -1;
      while (t_mux < 0 || t_add < 0) begin
        if (t_mux < 0 && mux_ready) t_mux = cycle - t0;
        if (t_add < 0 && add_ready) t_add = cycle - t0;
        @(negedge clk);
      end
      check(t_mux == MUX_P*MUX_LEN + 1, $sformatf("mux load time %0d", t_mux));
      check(t_add == ADD_P*ADD_LEN + 1, $sformatf("adder load time %0d", t_add));
      t0 = cycle;
      for (int i = 0; i < n; i++) begin
        logic [32:0] exp;
        mux_d = $urandom; add_a = $urandom; add_cin = 1'($urandom);
        #1;
        exp = 33'(add_a) + 33'(add_b[k % 2]) + 33'(add_cin);
        check(mux_y == mux_d[s], $sformatf("mux s=%0d", s));
        check({add_cout, add_y} == exp, "adder");
        @(negedge clk);
      end
      t_ops = cycle - t0;
      $display("%s %s: ops between invalidations %0d, load clocks mux %0d adder %0d, operating clocks %0d",
               (MUX_ARCH == ARCH_MODIFIED) ? "modified" : "stock", SERIAL ? "serial" : "parallel",
               n, t_mux, t_add, t_ops);
    end
    done = 1;
  end
endmodule
