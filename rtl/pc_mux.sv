// N:1 multiplexer whose select is a pseudo-constant.
//
// The data inputs are cut into groups of K, one group per LUT. The select
// value s is folded into the tables: the LUT holding input s stores the
// function "pass input s mod K", so a K:1 mux costs one LUT. The group number
// s / K is the pseudo-constant select of the slice-level muxes that join the
// LUT outputs; it is latched from the controller (pc_sel) when a new table
// set has been loaded. Tables of the other LUTs are don't-care.
//
// ARCH picks the primitive:
//   ARCH_V5        K = 5: each LUT is a 32-bit shift register read at five
//                  inputs. A slice of four LUTs gives a 20:1 mux.
//                  Configuration: one bit of cfg_d[i] per clock while
//                  cfg_we[i] is high, 32 clocks, the bit for index 31 first;
//                  cfg_addr is not used (shift registers need no address).
//                  With CFG_CHAIN = 1 the LUTs form one configuration chain
//                  instead: cfg_we[0] shifts all of them, cfg_d[0] enters
//                  LUT 0, and clock c carries chain bit 32*NLUT-1-c, where
//                  chain bit 32*i + k is index k of LUT i.
//   ARCH_MODIFIED  K = 6: LUT RAM in slices with separate write-address pins,
//                  all four LUTs usable, 24:1 per slice. Configuration: table
//                  bit cfg_addr of LUT i is written with cfg_d[i] when
//                  cfg_we[i] is high, 64 clocks, address 0 first.
// Table index x = the LUT's K data inputs, lowest-numbered input in bit 0.
// y is combinational in d.
//
// The K values, per-slice sizes and the primitives used follow the design;
// the group select register and how it is loaded are this design's own.
module pc_mux
  import pc_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter arch_e       ARCH = ARCH_V5,
  parameter bit          CFG_CHAIN = 1'b0,   // stock fabric only
  localparam int unsigned K      = (ARCH == ARCH_MODIFIED) ? 6 : 5,
  localparam int unsigned NLUT   = (N + K - 1) / K,
  localparam int unsigned NSLICE = (NLUT + LUTS_PER_SLICE - 1) / LUTS_PER_SLICE,
  localparam int unsigned SELW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NLUT-1:0]  cfg_we,
  input  logic [NLUT-1:0]  cfg_d,
  input  logic [5:0]       cfg_addr,
  input  logic             sel_load, // latch pc_sel (end of a reconfiguration)
  input  logic [SELW-1:0]  pc_sel,
  input  logic [N-1:0]     d,
  output logic             y
);

  localparam int unsigned NPAD = LUTS_PER_SLICE * NSLICE;

  logic [K*NPAD-1:0] d_ext;
  logic [NPAD-1:0]   lut_o;
  logic [SELW-1:0]   sel_q;

  assign d_ext = (K*NPAD)'(d);

  if (ARCH == ARCH_MODIFIED) begin : g_mod
    logic [NPAD-1:0] we_ext, di_ext;
    assign we_ext = NPAD'(cfg_we);
    assign di_ext = NPAD'(cfg_d);
    for (genvar s = 0; s < NSLICE; s++) begin : g_slice
      logic [LUTS_PER_SLICE-1:0][5:0] a_s;
      logic [LUTS_PER_SLICE-1:0]      o5_unused;
      for (genvar j = 0; j < LUTS_PER_SLICE; j++) begin : g_in
        assign a_s[j] = d_ext[K*(LUTS_PER_SLICE*s+j) +: 6];
      end
      pc_lutram_slice #(.ARCH(ARCH_MODIFIED)) u_slice (
        .clk (clk),
        .we  (we_ext[LUTS_PER_SLICE*s +: LUTS_PER_SLICE]),
        .a   (a_s),
        .wa  (cfg_addr),
        .di  (di_ext[LUTS_PER_SLICE*s +: LUTS_PER_SLICE]),
        .o6  (lut_o[LUTS_PER_SLICE*s +: LUTS_PER_SLICE]),
        .o5  (o5_unused)
      );
    end
  end else begin : g_v5
    logic [NLUT-1:0] so;
    for (genvar i = 0; i < NLUT; i++) begin : g_lut
      logic o5_unused;
      logic we_i, si_i;
      if (CFG_CHAIN) begin : g_chain
        assign we_i = cfg_we[0];
        if (i == 0) begin : g_head
          assign si_i = cfg_d[0];
        end else begin : g_link
          assign si_i = so[i-1];
        end
      end else begin : g_own
        assign we_i = cfg_we[i];
        assign si_i = cfg_d[i];
      end
      pc_lut6_2 #(.MODE(LUT_SRL32)) u_lut (
        .clk (clk),
        .we  (we_i),
        .a   ({1'b0, d_ext[K*i +: 5]}),
        .wa  (6'd0),
        .di  (1'b0),
        .si1 (si_i),
        .o6  (lut_o[i]),
        .o5  (o5_unused),
        .so  (so[i])
      );
    end
    if (NPAD > NLUT) begin : g_pad
      assign lut_o[NPAD-1:NLUT] = '0;
    end
  end

  // Slice-level muxes with a pseudo-constant select.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sel_q <= '0;
    else if (sel_load) sel_q <= pc_sel;
  end

  localparam int unsigned GW = (NPAD > 1) ? $clog2(NPAD) : 1;
  logic [GW-1:0] grp;
  assign grp = GW'(sel_q / SELW'(K));
  assign y   = lut_o[grp];

endmodule
