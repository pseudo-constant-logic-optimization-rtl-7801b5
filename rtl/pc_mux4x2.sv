// Four-input, two-output selector with pseudo-constant selects, in a single
// LUT used as two 16-bit shift registers.
//
// The four data inputs address both halves of the LUT. Each half holds the
// table of one output: y[0] = d[s0] in the upper half (O6), y[1] = d[s1] in
// the lower half (O5), where s0 and s1 are pseudo-constants folded into the
// tables. Two ordinary 4:1 muxes would need one LUT each. The selector is
// combinational; it is valid once the LUT has been configured.
//
// Table index x = d (LUT inputs A4..A1). Configuration: while cfg_we is high,
// cfg_d[0] shifts into the O6 table and cfg_d[1] into the O5 table, 16
// clocks, the bit for index 15 first. A value number v = {s1, s0} names one
// of the 16 bitfiles.
//
// One LUT for a four-input, two-output mux follows the design; reading it as
// two outputs with their own selects over the same four inputs is this
// design's interpretation.
module pc_mux4x2
  import pc_pkg::*;
(
  input  logic       clk,
  input  logic       cfg_we,
  input  logic [1:0] cfg_d,
  input  logic [3:0] d,
  output logic [1:0] y
);

  pc_lut6_2 #(.MODE(LUT_SRL16X2)) u_lut (
    .clk (clk),
    .we  (cfg_we),
    .a   ({2'b00, d}),
    .wa  (6'd0),
    .di  (cfg_d[1]),
    .si1 (cfg_d[0]),
    .o6  (y[0]),
    .o5  (y[1]),
    .so  ()
  );

endmodule
