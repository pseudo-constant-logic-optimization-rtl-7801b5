// One slice of four LUTs (A, B, C, D) used as distributed RAM, the LUT-RAM
// pseudo-constant primitive.
//
// All four LUTs are 64x1 RAMs that share one write address; each has its own
// write enable and write data, so a configuration controller can load the
// truth tables one LUT at a time or all at once (one table bit per LUT per
// clock, at the shared address).
//
// ARCH selects where the shared write address comes from:
//   ARCH_V5        the six inputs of LUT D are the write address, as in the
//                  stock Virtex-5 slice. LUT D therefore cannot compute a
//                  function of its own: its read address is the write address
//                  and the wa port is ignored. The slice gives three 6-input
//                  (or three 5-input, 2-output) functions.
//   ARCH_MODIFIED  the slice has a separate set of write-address pins (wa),
//                  so LUT D is free and the slice gives four functions.
// Outputs are combinational functions of a[]; writes land on the clock edge.
//
// The shared write address on LUT D's inputs, the three-of-four usable LUTs
// and the extra address pins of the modified slice follow the design; having
// one write enable per LUT is this design's choice.
module pc_lutram_slice
  import pc_pkg::*;
#(
  parameter arch_e ARCH = ARCH_V5
) (
  input  logic                           clk,
  input  logic [LUTS_PER_SLICE-1:0]      we,  // per-LUT write enable
  input  logic [LUTS_PER_SLICE-1:0][5:0] a,   // read inputs of A..D (index 3 = D)
  input  logic [5:0]                     wa,  // extra write-address pins (modified slice only)
  input  logic [LUTS_PER_SLICE-1:0]      di,  // per-LUT write data
  output logic [LUTS_PER_SLICE-1:0]      o6,
  output logic [LUTS_PER_SLICE-1:0]      o5
);

  logic [5:0] waddr;

  assign waddr = (ARCH == ARCH_MODIFIED) ? wa : a[LUTS_PER_SLICE-1];

  for (genvar i = 0; i < LUTS_PER_SLICE; i++) begin : g_lut
    pc_lut6_2 #(.MODE(LUT_RAM64)) u_lut (
      .clk (clk),
      .we  (we[i]),
      .a   (a[i]),
      .wa  (waddr),
      .di  (di[i]),
      .si1 (1'b0),
      .o6  (o6[i]),
      .o5  (o5[i]),
      .so  ()
    );
  end

endmodule
