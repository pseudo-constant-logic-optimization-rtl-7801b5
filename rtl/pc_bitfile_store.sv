// Block RAM holding the precomputed bitfiles, one per pseudo-constant value.
//
// Bitfiles are made ahead of time (one set of LUT truth tables per value the
// pseudo-constant may take) and written in through the host port. During a
// reconfiguration the controller reads one word per clock; each word is one
// configuration clock's worth of bits for the LUTs loaded in parallel.
// Simple dual-port: host write port, registered read port with one clock of
// latency (data appear the clock after rd_en). Contents are not reset.
//
// Storing precomputed bitfiles in block RAM follows the design; the word
// layout (set by the controller) and the host write port are this design's.
module pc_bitfile_store #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
