// Magnitude comparator with one pseudo-constant operand: gt = (a > B), B held
// in the LUT tables.
//
// The variable operand is cut into groups of four bits, least significant
// first. Each group drives one LUT used as a 32-bit shift register; its fifth
// input is the result of the group below. Each LUT answers "is a greater than
// B over the bits seen so far": 1 if its a group is greater than its B group,
// the incoming result if they are equal, 0 if it is smaller. The chain of
// NLUT = ceil(WIDTH/4) LUTs (8 for 32 bits, against 11 for an ordinary
// comparator) is combinational; the least significant group sees 0.
//
// Table index x = {c_in, a_group[3:0]} (LUT inputs A5..A1). Configuration,
// chosen by CFG_CHAIN:
//   0  each LUT has its own input: cfg_we[i] shifts LUT i, one bit of
//      cfg_d[i] per clock, 32 clocks, the bit for index 31 first.
//   1  the shift-out of LUT i feeds the shift-in of LUT i+1, making one
//      32*NLUT-bit configuration chain. cfg_we[0] shifts all LUTs and cfg_d[0]
//      enters LUT 0; the other cfg_we/cfg_d bits are unused. Clock c carries
//      bit (32*NLUT-1-c) of the chain, where chain bit 32*i + k is index k
//      of LUT i: the top LUT's table goes in first.
//
// The four-bits-plus-carry LUT cascade, the 8-LUT count and loading SRL32s
// through one long configuration chain follow the design;
// that the comparison is "greater than" and unsigned is this design's choice.
module pc_cmp
  import pc_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter bit          CFG_CHAIN = 1'b0,
  localparam int unsigned NLUT = (WIDTH + 3) / 4
) (
  input  logic             clk,
  input  logic [NLUT-1:0]  cfg_we,
  input  logic [NLUT-1:0]  cfg_d,
  input  logic [WIDTH-1:0] a,
  output logic             gt
);

  logic [4*NLUT-1:0] a_ext;
  logic [NLUT:0]     c;

  assign a_ext = (4*NLUT)'(a);
  assign c[0]  = 1'b0;

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
      .a   ({1'b0, c[i], a_ext[4*i+3:4*i]}),
      .wa  (6'd0),
      .di  (1'b0),
      .si1 (si_i),
      .o6  (c[i+1]),
      .o5  (o5_unused),
      .so  (so[i])
    );
  end

  assign gt = c[NLUT];

endmodule
