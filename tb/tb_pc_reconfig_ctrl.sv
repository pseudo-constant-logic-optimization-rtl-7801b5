// Self-checking test of pc_reconfig_ctrl with a small store (6 LUTs, 2 bits
// per clock, 4 clocks per LUT, 3 values). Two controllers share one store
// image laid out for their lane count: one loads 2 LUTs at a time (3
// phases), one loads all 6 at once. Every LUT write is recorded and compared
// with the store contents it should carry; the load time must be
// PHASES*LEN + 1 clocks; an invalidation during a load must restart it with
// the new value.
module tb_pc_reconfig_ctrl;
  localparam int NLUT = 6, LEN = 4, CW = 2, NVAL = 3;
  localparam int L2 = 2, L6 = 6;
  localparam int P2 = NLUT / L2, P6 = NLUT / L6;
  localparam int D2 = NVAL * P2 * LEN, D6 = NVAL * P6 * LEN;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, inval;
  logic [1:0] inval_val;

  // stored bits: bits[v][lut][clock]
  logic [CW-1:0] bits [NVAL][NLUT][LEN];

  // controller with 2 lanes
  logic busy2, ready2, sl2, rd_en2;
  logic [1:0] lv2, lv6;
  logic [1:0] cur2;
  logic [5:0] ra2;
  logic [L2*CW-1:0] rd2;
  logic [NLUT-1:0] we2;
  logic [NLUT-1:0][CW-1:0] cd2;
  logic [5:0] ca2;
  // controller with 6 lanes
  logic busy6, ready6, sl6, rd_en6;
  logic [1:0] cur6;
  logic [3:0] ra6;
  logic [L6*CW-1:0] rd6;
  logic [NLUT-1:0] we6;
  logic [NLUT-1:0][CW-1:0] cd6;
  logic [5:0] ca6;

  logic [L2*CW-1:0] mem2 [D2];
  logic [L6*CW-1:0] mem6 [D6];

  pc_reconfig_ctrl #(.NLUT(NLUT), .LANES(L2), .LEN(LEN), .CW(CW), .NVAL(NVAL)) u2 (
    .clk, .rst_n, .inval, .inval_val, .busy(busy2), .ready(ready2), .cur_val(cur2),
    .sel_load(sl2), .load_val(lv2), .rd_en(rd_en2), .rd_addr(ra2), .rd_data(rd2),
    .cfg_we(we2), .cfg_d(cd2), .cfg_addr(ca2));
  pc_reconfig_ctrl #(.NLUT(NLUT), .LANES(L6), .LEN(LEN), .CW(CW), .NVAL(NVAL)) u6 (
    .clk, .rst_n, .inval, .inval_val, .busy(busy6), .ready(ready6), .cur_val(cur6),
    .sel_load(sl6), .load_val(lv6), .rd_en(rd_en6), .rd_addr(ra6), .rd_data(rd6),
    .cfg_we(we6), .cfg_d(cd6), .cfg_addr(ca6));

  // behavioural block RAMs, one clock read latency
  always_ff @(posedge clk) begin
    if (rd_en2) rd2 <= mem2[ra2];
    if (rd_en6) rd6 <= mem6[ra6];
  end

  // record what each LUT receives, as a shift history and by address
  logic [CW-1:0] got2 [NLUT][LEN], got6 [NLUT][LEN];
  int cnt2 [NLUT], cnt6 [NLUT];
  always_ff @(posedge clk) begin
    for (int j = 0; j < NLUT; j++) begin
      if (we2[j]) begin got2[j][ca2[1:0]] <= cd2[j]; cnt2[j] <= cnt2[j] + 1; end
      if (we6[j]) begin got6[j][ca6[1:0]] <= cd6[j]; cnt6[j] <= cnt6[j] + 1; end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_counts();
    for (int j = 0; j < NLUT; j++) begin cnt2[j] = 0; cnt6[j] = 0; end
  endtask

  task automatic verify(int v);
    for (int j = 0; j < NLUT; j++) begin
      check(cnt2[j] == LEN, $sformatf("2-lane lut %0d write count %0d", j, cnt2[j]));
      check(cnt6[j] == LEN, $sformatf("6-lane lut %0d write count %0d", j, cnt6[j]));
      for (int c = 0; c < LEN; c++) begin
        check(got2[j][c] == bits[v][j][c], $sformatf("2-lane v%0d lut %0d clk %0d", v, j, c));
        check(got6[j][c] == bits[v][j][c], $sformatf("6-lane v%0d lut %0d clk %0d", v, j, c));
      end
    end
    check(cur2 == 2'(v) && cur6 == 2'(v), "cur_val");
    check(ready2 && ready6 && !busy2 && !busy6, "ready after load");
  endtask

  initial begin
    int t2, t6, t;
    // build bitfiles and lay them out for both lane counts
    for (int v = 0; v < NVAL; v++)
      for (int j = 0; j < NLUT; j++)
        for (int c = 0; c < LEN; c++) bits[v][j][c] = CW'($urandom);
    for (int v = 0; v < NVAL; v++)
      for (int j = 0; j < NLUT; j++)
        for (int c = 0; c < LEN; c++) begin
          mem2[(v*P2 + j/L2)*LEN + c][(j%L2)*CW +: CW] = bits[v][j][c];
          mem6[(v*P6 + j/L6)*LEN + c][(j%L6)*CW +: CW] = bits[v][j][c];
        end
    rst_n = 0; inval = 0; inval_val = '0;
    clear_counts();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!ready2 && !ready6 && !busy2 && !busy6, "idle after reset");
    for (int v = 0; v < NVAL; v++) begin
      clear_counts();
      inval = 1; inval_val = 2'(v);
      @(negedge clk);
      inval = 0;
      t = 1; t2 = -1; t6 = -1;
      while ((t2 < 0 || t6 < 0) && t < 100) begin
        if (sl2) check(lv2 == 2'(v) && !ready2, "sel_load with the loaded value");
        if (t2 < 0 && ready2) t2 = t;
        if (t6 < 0 && ready6) t6 = t;
        check(!(ready2 && busy2), "ready and busy together");
        @(negedge clk);
        t++;
      end
      // ready is seen one clock after the final write
      check(t2 == P2*LEN + 1 + 1, $sformatf("2-lane load time %0d", t2));
      check(t6 == P6*LEN + 1 + 1, $sformatf("6-lane load time %0d", t6));
      verify(v);
    end
    // restart: invalidate with value 0, then value 2 mid-load
    clear_counts();
    inval = 1; inval_val = 2'd0;
    @(negedge clk);
    inval = 0;
    repeat (3) @(negedge clk);
    inval = 1; inval_val = 2'd2;
    @(negedge clk);
    inval = 0;
    clear_counts();
    repeat (P2*LEN + 4) @(negedge clk);
    verify(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
