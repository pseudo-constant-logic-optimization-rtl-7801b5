// Three-bit adder segment with one pseudo-constant operand folded into its
// truth tables.
//
// Inputs are three bits of the variable operand (a) and the carry from the
// segment below (cin); the pseudo-constant operand's three bits exist only in
// the stored tables. The four inputs address two LUTs used as two 16-bit
// shift registers each, giving four outputs: the three sum bits and the carry
// out. Internal carries between the three bits are never formed as signals, so
// a 3-bit add costs two LUTs instead of three.
//
// Table index x = {cin, a[2], a[1], a[0]} (LUT inputs A4..A1). For pseudo-
// constant bits b, let t = a + b + cin (4 bits). LUT 0 holds t[0] (O6) and
// t[1] (O5), LUT 1 holds t[2] (O6) and t[3] = carry out (O5).
// Configuration: cfg_we[i] shifts LUT i; cfg_d[i][0] feeds its O6 register,
// cfg_d[i][1] its O5 register, one bit per clock, 16 clocks per LUT; the bit
// for index 15 goes first. The add itself is combinational.
//
// The two-LUT, four-input, four-output segment follows the design; the table
// index order and the assignment of outputs to O6/O5 are this design's own.
module pc_adder3
  import pc_pkg::*;
(
  input  logic            clk,
  input  logic [1:0]      cfg_we,
  input  logic [1:0][1:0] cfg_d,
  input  logic [2:0]      a,
  input  logic            cin,
  output logic [2:0]      s,
  output logic            cout
);

  logic [5:0] idx;
  logic [1:0] o6, o5;

  assign idx = {2'b00, cin, a};

  for (genvar i = 0; i < 2; i++) begin : g_lut
    pc_lut6_2 #(.MODE(LUT_SRL16X2)) u_lut (
      .clk (clk),
      .we  (cfg_we[i]),
      .a   (idx),
      .wa  (6'd0),
      .di  (cfg_d[i][1]),
      .si1 (cfg_d[i][0]),
      .o6  (o6[i]),
      .o5  (o5[i]),
      .so  ()
    );
  end

  assign s    = {o6[1], o5[0], o6[0]};
  assign cout = o5[1];

endmodule
