// Ripple adder with one pseudo-constant operand, built from chained 3-bit
// pseudo-constant segments (pc_adder3).
//
// y = a + B + cin, where B is the pseudo-constant held in the LUT tables.
// WIDTH bits need SEGS = ceil(WIDTH/3) segments and 2*SEGS LUTs: 11 segments
// and 22 LUTs for the 32-bit adder, against 32 LUTs for an ordinary ripple-
// carry adder. The critical path runs through SEGS LUTs (11 rather than 32
// carry stages). The whole adder is combinational; it is valid only once
// every LUT has been configured.
//
// When WIDTH is not a multiple of 3, the top segment sees zeros on its unused
// a inputs, and its tables must be generated with zeros for the matching
// pseudo-constant bits; the first unused sum output is then the adder's carry
// out. Configuration port: LUT 2k and 2k+1 belong to segment k, see pc_adder3.
//
// The segment structure, the 22-LUT count and the chaining follow the design;
// the carry-in port and the handling of a partial top segment are this
// design's own.
module pc_adder
  import pc_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  localparam int unsigned SEGS = (WIDTH + 2) / 3,
  localparam int unsigned NLUT = 2 * SEGS
) (
  input  logic                 clk,
  input  logic [NLUT-1:0]      cfg_we,
  input  logic [NLUT-1:0][1:0] cfg_d,
  input  logic [WIDTH-1:0]     a,
  input  logic                 cin,
  output logic [WIDTH-1:0]     y,
  output logic                 cout
);

  logic [3*SEGS-1:0] a_ext;
  logic [3*SEGS-1:0] s_ext;
  logic [SEGS:0]     c;

  assign a_ext = (3*SEGS)'(a);
  assign c[0]  = cin;

  for (genvar k = 0; k < SEGS; k++) begin : g_seg
    pc_adder3 u_seg (
      .clk    (clk),
      .cfg_we (cfg_we[2*k+1:2*k]),
      .cfg_d  (cfg_d[2*k+1:2*k]),
      .a      (a_ext[3*k+2:3*k]),
      .cin    (c[k]),
      .s      (s_ext[3*k+2:3*k]),
      .cout   (c[k+1])
    );
  end

  logic [3*SEGS:0] full;
  assign full = {c[SEGS], s_ext};
  assign y    = full[WIDTH-1:0];
  assign cout = full[WIDTH];

endmodule
