// Six-input, two-output reconfigurable LUT, the primitive every
// pseudo-constant circuit in this library is built from.
//
// The 64 storage bits are split into an upper and a lower 32-bit half, each
// with its own read decoder. Output O6 reads the whole table (input A6 picks
// the half); O5 always reads the lower half. The same storage can be written
// at run time in one of three ways, chosen by MODE:
//   LUT_RAM64   64x1 RAM: when we=1, bit wa is written with di on the clock.
//               O6 = table[A6..A1], O5 = table[A5..A1] of the lower half.
//   LUT_SRL32   one 32-bit shift register: when we=1, si1 enters the upper
//               16 bits, which feed the lower 16 bits; so is the bit leaving
//               the chain. O6 = O5 = chain[A5..A1], chain[0] = newest bit.
//   LUT_SRL16X2 two independent 16-bit shift registers sharing we: the upper
//               one shifts in si1 and drives O6, the lower one shifts in di
//               and drives O5; both are read at A4..A1.
// Reads are combinational; writes and shifts take effect on the next rising
// clock edge. The table has no reset and no power-up value: it is undefined
// until it has been written.
//
// The three modes, the split into two halves, the O5/O6 outputs, the
// shift-in and shift-out pins and the 64/32/16 sizes follow the Virtex-5 LUT
// as described for this design. Which read inputs address a 16-bit shift
// register (A4..A1) and the bit order inside a half are this design's
// choices. The slice-level write-address bits WA7/WA8 are not part of a
// single LUT here.
module pc_lut6_2
  import pc_pkg::*;
#(
  parameter lut_mode_e MODE = LUT_RAM64
) (
  input  logic       clk,
  input  logic       we,   // write enable (RAM) or shift enable (SRL)
  input  logic [5:0] a,    // read address / logic inputs, a[0] = A1
  input  logic [5:0] wa,   // RAM write address, wa[0] = WA1
  input  logic       di,   // RAM write data, or shift-in of the lower SRL16
  input  logic       si1,  // shift-in of SRL32 and of the upper SRL16
  output logic       o6,
  output logic       o5,
  output logic       so    // shift-out, end of the SRL chain
);

  logic [63:0] mem;
  logic [63:0] mem_next;
  logic [31:0] chain;       // SRL32 view: upper 16 bits then lower 16 bits

  assign chain = {mem[15:0], mem[47:32]};

  always_comb begin
    mem_next = mem;
    unique case (MODE)
      LUT_RAM64:   mem_next[wa] = di;
      LUT_SRL32: begin
        mem_next[47:32] = {mem[46:32], si1};
        mem_next[15:0]  = {mem[14:0], mem[47]};
      end
      default: begin
        mem_next[47:32] = {mem[46:32], si1};
        mem_next[15:0]  = {mem[14:0], di};
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) mem <= mem_next;
  end

  always_comb begin
    unique case (MODE)
      LUT_RAM64: begin
        o6 = mem[a];
        o5 = mem[{1'b0, a[4:0]}];
      end
      LUT_SRL32: begin
        o6 = chain[a[4:0]];
        o5 = o6;
      end
      default: begin
        o6 = mem[{2'b10, a[3:0]}];
        o5 = mem[{2'b00, a[3:0]}];
      end
    endcase
  end

  assign so = mem[15];

endmodule
