// Reconfiguration controller: on a pseudo-constant invalidation, copies the
// bitfile of the new value from the bitfile store into the circuit's LUTs.
//
// The circuit has NLUT LUTs, each filled in LEN configuration clocks with CW
// bits per clock. LANES LUTs are loaded at the same time, so loading takes
// NLUT/LANES phases of LEN clocks:
//   LANES = 1      fully serial: one LUT at a time, least hardware, longest
//   LANES = NLUT   fully parallel: all LUTs at once, LEN clocks
// and anything between that divides NLUT. Store word layout (width
// LANES*CW): word (v*PHASES + p)*LEN + c holds, in lane l, the CW bits that
// LUT p*LANES + l takes in clock c of the load of value v.
//
// Timing: inval (one clock, with inval_val) starts a load; an invalidation
// during a load restarts it with the new value. The store answers one clock
// after each read, so the LUT writes trail the reads by one clock and the
// load ends PHASES*LEN + 1 clocks after inval, when busy falls, ready rises
// and cur_val takes the new value. In the clock before, sel_load pulses with
// load_val = that value, for registers that must switch with the tables. The
// circuit's outputs are valid only while ready is high. cfg_addr is the
// clock number within the phase, used as the write address of LUT RAM (its
// low six bits; LEN may exceed 64 when LUTs form one long shift chain).
// With the default LANES = NLUT, cfg_d is the store's read data passed
// straight through and the top bits of cfg_addr stay zero (LEN = 16); both
// are intended.
//
// Loading precomputed bitfiles on an invalidation and the serial/parallel
// trade-off follow the design; the word layout, the restart rule and the
// handshake are this design's own.
module pc_reconfig_ctrl #(
  parameter int unsigned NLUT  = 22,
  parameter int unsigned LANES = 22,
  parameter int unsigned LEN   = 16,
  parameter int unsigned CW    = 2,
  parameter int unsigned NVAL  = 2,
  localparam int unsigned PHASES = NLUT / LANES,
  localparam int unsigned DEPTH  = NVAL * PHASES * LEN,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned VW     = (NVAL > 1) ? $clog2(NVAL) : 1,
  localparam int unsigned PW     = (PHASES > 1) ? $clog2(PHASES) : 1,
  localparam int unsigned LW     = (LEN > 1) ? $clog2(LEN) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // invalidation request
  input  logic                     inval,
  input  logic [VW-1:0]            inval_val,
  output logic                     busy,
  output logic                     ready,
  output logic [VW-1:0]            cur_val,
  output logic                     sel_load,
  output logic [VW-1:0]            load_val,
  // bitfile store read port
  output logic                     rd_en,
  output logic [AW-1:0]            rd_addr,
  input  logic [LANES*CW-1:0]      rd_data,
  // LUT configuration port
  output logic [NLUT-1:0]          cfg_we,
  output logic [NLUT-1:0][CW-1:0]  cfg_d,
  output logic [5:0]               cfg_addr
);

  logic [VW-1:0] val_q;
  logic [PW-1:0] phase_q;
  logic [LW-1:0] cyc_q;
  logic          loading_q;   // reads being issued
  logic          wr_q;        // a read answered this clock: write LUTs
  logic          last_q;      // that answer is the final one
  logic [PW-1:0] wr_phase_q;
  logic [LW-1:0] wr_cyc_q;
  logic          ready_q;
  logic [VW-1:0] cur_q;

  logic last_rd;
  assign last_rd = loading_q && (phase_q == PW'(PHASES - 1)) && (cyc_q == LW'(LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val_q      <= '0;
      phase_q    <= '0;
      cyc_q      <= '0;
      loading_q  <= 1'b0;
      wr_q       <= 1'b0;
      last_q     <= 1'b0;
      wr_phase_q <= '0;
      wr_cyc_q   <= '0;
      ready_q    <= 1'b0;
      cur_q      <= '0;
    end else begin
      wr_q       <= loading_q && !inval;
      last_q     <= last_rd && !inval;
      wr_phase_q <= phase_q;
      wr_cyc_q   <= cyc_q;
      if (inval) begin
        val_q     <= inval_val;
        phase_q   <= '0;
        cyc_q     <= '0;
        loading_q <= 1'b1;
        ready_q   <= 1'b0;
      end else if (loading_q) begin
        if (cyc_q == LW'(LEN - 1)) begin
          cyc_q   <= '0;
          phase_q <= phase_q + 1'b1;
          if (last_rd) loading_q <= 1'b0;
        end else begin
          cyc_q <= cyc_q + 1'b1;
        end
      end
      if (last_q && !inval) begin
        ready_q <= 1'b1;
        cur_q   <= val_q;
      end
    end
  end

  assign rd_en   = loading_q;
  assign rd_addr = AW'((32'(val_q) * PHASES + 32'(phase_q)) * LEN + 32'(cyc_q));

  always_comb begin
    for (int unsigned j = 0; j < NLUT; j++) begin
      cfg_we[j] = wr_q && (32'(wr_phase_q) == j / LANES);
      cfg_d[j]  = rd_data[(j % LANES)*CW +: CW];
    end
  end

  assign cfg_addr = 6'(wr_cyc_q);
  assign busy     = loading_q || wr_q;
  assign ready    = ready_q;
  assign cur_val  = cur_q;
  assign sel_load = last_q && !inval;
  assign load_val = val_q;

  initial begin
    assert (NLUT % LANES == 0) else $error("LANES must divide NLUT");
  end

endmodule
