// Self-checking test of the pseudo-constant 32:1 mux on both fabrics: five-
// input shift-register LUTs (7 LUTs) and six-input LUT RAM in modified slices
// (6 LUTs). For every select value the tables are loaded, the group select
// is latched, and y is compared with d[s] for random data. A third instance
// (five-input LUTs) is loaded through one 224-bit configuration chain.
module tb_pc_mux;
  import pc_pkg::*;
  import pc_tb_pkg::*;

  localparam int N = 32;
  localparam int K5 = 5, K6 = 6;
  localparam int NL5 = (N + K5 - 1) / K5, NL6 = (N + K6 - 1) / K6;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           rst_n;
  logic [NL5-1:0] we5, d5;
  logic [NL6-1:0] we6, d6;
  logic [5:0]     addr;
  logic           sel_load;
  logic [4:0]     sel;
  logic [N-1:0]   d;
  logic           y5, y6, yc;
  logic [NL5-1:0] wec, dc;

  pc_mux #(.N(N), .ARCH(ARCH_V5)) u_v5 (.clk, .rst_n, .cfg_we(we5), .cfg_d(d5), .cfg_addr(addr),
                                        .sel_load, .pc_sel(sel), .d, .y(y5));
  pc_mux #(.N(N), .ARCH(ARCH_V5), .CFG_CHAIN(1'b1)) u_ch (.clk, .rst_n, .cfg_we(wec), .cfg_d(dc),
                                        .cfg_addr(addr), .sel_load, .pc_sel(sel), .d, .y(yc));
  pc_mux #(.N(N), .ARCH(ARCH_MODIFIED)) u_m (.clk, .rst_n, .cfg_we(we6), .cfg_d(d6), .cfg_addr(addr),
                                             .sel_load, .pc_sel(sel), .d, .y(y6));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wec = '0; dc = '0; we5 = '0; we6 = '0; d5 = '0; d6 = '0; addr = '0; sel_load = 0; sel = '0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++) begin
      // 224 clocks: the chained instance shifts every clock, the per-LUT
      // shift registers in the first 32, the LUT RAMs in the first 64
      for (int c = 0; c < 32*NL5; c++) begin
        int g;
        g = 32*NL5 - 1 - c;
        @(negedge clk);
        wec  = NL5'(1);
        dc   = NL5'(mux_tab(s, K5, g / 32).t6[g % 32]);
        addr = 6'(c);
        we5  = (c < 32) ? '1 : '0;
        we6  = (c < 64) ? '1 : '0;
        for (int j = 0; j < NL5; j++) d5[j] = (c < 32) ? cfg_bits(LUT_SRL32, mux_tab(s, K5, j), c)[0] : 1'b0;
        for (int j = 0; j < NL6; j++) d6[j] = (c < 64) ? cfg_bits(LUT_RAM64, mux_tab(s, K6, j), c)[0] : 1'b0;
      end
      @(negedge clk);
      we5 = '0; we6 = '0; wec = '0;
      sel = 5'(s); sel_load = 1;
      @(negedge clk);
      sel_load = 0; sel = 5'($urandom);   // latched select must hold
      for (int n = 0; n < 40; n++) begin
        d = (n == 0) ? (N'(1) << s) : (n == 1) ? ~(N'(1) << s) : $urandom;
        #1;
        checks += 3;
        if (yc !== d[s]) begin failures++; $display("FAIL chained s=%0d d=%h y=%0d", s, d, yc); end
        if (y5 !== d[s]) begin failures++; $display("FAIL v5 s=%0d d=%h y=%0d", s, d, y5); end
        if (y6 !== d[s]) begin failures++; $display("FAIL mod s=%0d d=%h y=%0d", s, d, y6); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
