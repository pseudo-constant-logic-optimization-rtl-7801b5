// Pseudo-constant arithmetic and selection units, each with its own bitfile
// store and reconfiguration controller.
//
// Three circuits that are usually replicated many times take one operand that
// changes rarely (a pseudo-constant). That operand is folded into LUT truth
// tables:
//   adder       y = a + B + cin            (pc_adder, 22 LUTs for 32 bits)
//   comparator  gt = a > C                 (pc_cmp, 8 LUTs for 32 bits)
//   mux         y = d[S]                   (pc_mux, 7 LUTs for 32 inputs)
//   selector    y = {d[S1], d[S0]}         (pc_mux4x2, 1 LUT, 4 inputs)
// B, C and S are never inputs of the datapath. Each unit keeps the bitfiles
// for the values its pseudo-constant may take in a block RAM
// (pc_bitfile_store), written beforehand through a host port. Raising
// <unit>_inval with a value number <unit>_inval_val (an invalidation) makes
// the unit's pc_reconfig_ctrl copy that bitfile into the LUTs; while it does,
// <unit>_busy is high and the unit's result is not valid. <unit>_ready rises
// when the new tables are in place; <unit>_cur_val then names the value
// loaded. The datapaths are combinational from operand to result.
//
// Load time per invalidation, with default parameters (fully parallel):
// adder 16 + 1, comparator 32 + 1, mux 32 + 1, selector 16 + 1 clocks. With
// *_LANES = 1 (fully serial) it is 22*16 + 1, 8*32 + 1 and 7*32 + 1 clocks.
// CMP_CHAIN / MUX_CHAIN = 1 loads the shift-register LUTs of the comparator /
// stock-fabric mux through one configuration chain (serial, 8*32 + 1 and
// 7*32 + 1 clocks) instead of one input per LUT. MUX_CHAIN has no effect on
// the modified fabric, whose LUT RAMs are written by address.
//
// The circuits, their LUT counts and the loading of stored bitfiles follow
// the design; the number of stored values for the adder and comparator, the
// default of parallel loading and the port protocol are this design's own.
module pc_top
  import pc_pkg::*;
#(
  parameter int unsigned ADD_WIDTH = 32,
  parameter int unsigned ADD_NVAL  = 2,
  parameter int unsigned ADD_LANES = 2 * ((ADD_WIDTH + 2) / 3),
  parameter int unsigned CMP_WIDTH = 32,
  parameter int unsigned CMP_NVAL  = 2,
  parameter bit          CMP_CHAIN = 1'b0,   // load all comparator LUTs through one shift chain
  parameter int unsigned CMP_LANES = CMP_CHAIN ? 1 : (CMP_WIDTH + 3) / 4,
  parameter int unsigned MUX_N     = 32,
  parameter arch_e       MUX_ARCH  = ARCH_V5,
  parameter bit          MUX_CHAIN = 1'b0,   // one shift chain (stock fabric only)
  parameter int unsigned MUX_LANES = MUX_CHAIN ? 1
                                     : (MUX_N + ((MUX_ARCH == ARCH_MODIFIED) ? 6 : 5) - 1)
                                       / ((MUX_ARCH == ARCH_MODIFIED) ? 6 : 5),
  // derived sizes
  localparam int unsigned ADD_NLUT = 2 * ((ADD_WIDTH + 2) / 3),
  localparam int unsigned ADD_LEN  = cfg_len(LUT_SRL16X2),
  localparam int unsigned ADD_CW   = cfg_width(LUT_SRL16X2),
  localparam int unsigned ADD_DEP  = ADD_NVAL * (ADD_NLUT / ADD_LANES) * ADD_LEN,
  localparam int unsigned ADD_AW   = (ADD_DEP > 1) ? $clog2(ADD_DEP) : 1,
  localparam int unsigned ADD_VW   = (ADD_NVAL > 1) ? $clog2(ADD_NVAL) : 1,
  localparam int unsigned CMP_NLUT = (CMP_WIDTH + 3) / 4,
  // configuration ports seen by the controller: one per LUT, or one chain
  localparam int unsigned CMP_CP   = CMP_CHAIN ? 1 : CMP_NLUT,
  localparam int unsigned CMP_LEN  = cfg_len(LUT_SRL32) * (CMP_CHAIN ? CMP_NLUT : 1),
  localparam int unsigned CMP_DEP  = CMP_NVAL * (CMP_CP / CMP_LANES) * CMP_LEN,
  localparam int unsigned CMP_AW   = (CMP_DEP > 1) ? $clog2(CMP_DEP) : 1,
  localparam int unsigned CMP_VW   = (CMP_NVAL > 1) ? $clog2(CMP_NVAL) : 1,
  localparam int unsigned MUX_K    = (MUX_ARCH == ARCH_MODIFIED) ? 6 : 5,
  localparam int unsigned MUX_NLUT = (MUX_N + MUX_K - 1) / MUX_K,
  localparam lut_mode_e   MUX_MODE = (MUX_ARCH == ARCH_MODIFIED) ? LUT_RAM64 : LUT_SRL32,
  localparam bit          MUX_CH   = MUX_CHAIN && (MUX_ARCH == ARCH_V5),
  localparam int unsigned MUX_CP   = MUX_CH ? 1 : MUX_NLUT,
  localparam int unsigned MUX_LEN  = cfg_len(MUX_MODE) * (MUX_CH ? MUX_NLUT : 1),
  localparam int unsigned MUX_DEP  = MUX_N * (MUX_CP / MUX_LANES) * MUX_LEN,
  localparam int unsigned MUX_AW   = (MUX_DEP > 1) ? $clog2(MUX_DEP) : 1,
  localparam int unsigned MUX_VW   = (MUX_N > 1) ? $clog2(MUX_N) : 1,
  localparam int unsigned M42_DEP  = 16 * 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // ---- adder ----
  input  logic                        add_st_we,
  input  logic [ADD_AW-1:0]           add_st_addr,
  input  logic [ADD_LANES*ADD_CW-1:0] add_st_data,
  input  logic                        add_inval,
  input  logic [ADD_VW-1:0]           add_inval_val,
  output logic                        add_busy,
  output logic                        add_ready,
  output logic [ADD_VW-1:0]           add_cur_val,
  input  logic [ADD_WIDTH-1:0]        add_a,
  input  logic                        add_cin,
  output logic [ADD_WIDTH-1:0]        add_y,
  output logic                        add_cout,
  // ---- comparator ----
  input  logic                        cmp_st_we,
  input  logic [CMP_AW-1:0]           cmp_st_addr,
  input  logic [CMP_LANES-1:0]        cmp_st_data,
  input  logic                        cmp_inval,
  input  logic [CMP_VW-1:0]           cmp_inval_val,
  output logic                        cmp_busy,
  output logic                        cmp_ready,
  output logic [CMP_VW-1:0]           cmp_cur_val,
  input  logic [CMP_WIDTH-1:0]        cmp_a,
  output logic                        cmp_gt,
  // ---- mux ----
  input  logic                        mux_st_we,
  input  logic [MUX_AW-1:0]           mux_st_addr,
  input  logic [MUX_LANES-1:0]        mux_st_data,
  input  logic                        mux_inval,
  input  logic [MUX_VW-1:0]           mux_inval_val,
  output logic                        mux_busy,
  output logic                        mux_ready,
  output logic [MUX_VW-1:0]           mux_cur_val,
  input  logic [MUX_N-1:0]            mux_d,
  output logic                        mux_y,
  // ---- four-input, two-output selector ----
  input  logic                        m42_st_we,
  input  logic [7:0]                  m42_st_addr,
  input  logic [1:0]                  m42_st_data,
  input  logic                        m42_inval,
  input  logic [3:0]                  m42_inval_val,  // {s1, s0}
  output logic                        m42_busy,
  output logic                        m42_ready,
  output logic [3:0]                  m42_cur_val,
  input  logic [3:0]                  m42_d,
  output logic [1:0]                  m42_y
);

  // ---------------- adder ----------------
  logic                           add_rd_en;
  logic [ADD_AW-1:0]              add_rd_addr;
  logic [ADD_LANES*ADD_CW-1:0]    add_rd_data;
  logic [ADD_NLUT-1:0]            add_cfg_we;
  logic [ADD_NLUT-1:0][ADD_CW-1:0] add_cfg_d;
  logic [5:0]                     add_cfg_addr_unused;
  logic                           add_sel_load_unused;
  logic [ADD_VW-1:0]              add_load_val_unused;

  pc_bitfile_store #(.DEPTH(ADD_DEP), .WIDTH(ADD_LANES*ADD_CW)) u_add_store (
    .clk, .wr_en(add_st_we), .wr_addr(add_st_addr), .wr_data(add_st_data),
    .rd_en(add_rd_en), .rd_addr(add_rd_addr), .rd_data(add_rd_data)
  );

  pc_reconfig_ctrl #(.NLUT(ADD_NLUT), .LANES(ADD_LANES), .LEN(ADD_LEN), .CW(ADD_CW),
                     .NVAL(ADD_NVAL)) u_add_ctrl (
    .clk, .rst_n, .inval(add_inval), .inval_val(add_inval_val),
    .busy(add_busy), .ready(add_ready), .cur_val(add_cur_val),
    .sel_load(add_sel_load_unused), .load_val(add_load_val_unused),
    .rd_en(add_rd_en), .rd_addr(add_rd_addr), .rd_data(add_rd_data),
    .cfg_we(add_cfg_we), .cfg_d(add_cfg_d), .cfg_addr(add_cfg_addr_unused)
  );

  pc_adder #(.WIDTH(ADD_WIDTH)) u_adder (
    .clk, .cfg_we(add_cfg_we), .cfg_d(add_cfg_d),
    .a(add_a), .cin(add_cin), .y(add_y), .cout(add_cout)
  );

  // ---------------- comparator ----------------
  logic                    cmp_rd_en;
  logic [CMP_AW-1:0]       cmp_rd_addr;
  logic [CMP_LANES-1:0]    cmp_rd_data;
  logic [CMP_CP-1:0]       cmp_ctl_we;
  logic [CMP_CP-1:0]       cmp_ctl_d;
  logic [CMP_NLUT-1:0]     cmp_cfg_we;
  logic [CMP_NLUT-1:0]     cmp_cfg_d;
  logic [5:0]              cmp_cfg_addr_unused;
  logic                    cmp_sel_load_unused;
  logic [CMP_VW-1:0]       cmp_load_val_unused;

  pc_bitfile_store #(.DEPTH(CMP_DEP), .WIDTH(CMP_LANES)) u_cmp_store (
    .clk, .wr_en(cmp_st_we), .wr_addr(cmp_st_addr), .wr_data(cmp_st_data),
    .rd_en(cmp_rd_en), .rd_addr(cmp_rd_addr), .rd_data(cmp_rd_data)
  );

  pc_reconfig_ctrl #(.NLUT(CMP_CP), .LANES(CMP_LANES), .LEN(CMP_LEN), .CW(1),
                     .NVAL(CMP_NVAL)) u_cmp_ctrl (
    .clk, .rst_n, .inval(cmp_inval), .inval_val(cmp_inval_val),
    .busy(cmp_busy), .ready(cmp_ready), .cur_val(cmp_cur_val),
    .sel_load(cmp_sel_load_unused), .load_val(cmp_load_val_unused),
    .rd_en(cmp_rd_en), .rd_addr(cmp_rd_addr), .rd_data(cmp_rd_data),
    .cfg_we(cmp_ctl_we), .cfg_d(cmp_ctl_d), .cfg_addr(cmp_cfg_addr_unused)
  );

  assign cmp_cfg_we = CMP_NLUT'(cmp_ctl_we);
  assign cmp_cfg_d  = CMP_NLUT'(cmp_ctl_d);

  pc_cmp #(.WIDTH(CMP_WIDTH), .CFG_CHAIN(CMP_CHAIN)) u_cmp (
    .clk, .cfg_we(cmp_cfg_we), .cfg_d(cmp_cfg_d), .a(cmp_a), .gt(cmp_gt)
  );

  // ---------------- mux ----------------
  logic                    mux_rd_en;
  logic [MUX_AW-1:0]       mux_rd_addr;
  logic [MUX_LANES-1:0]    mux_rd_data;
  logic [MUX_CP-1:0]       mux_ctl_we;
  logic [MUX_CP-1:0]       mux_ctl_d;
  logic [MUX_NLUT-1:0]     mux_cfg_we;
  logic [MUX_NLUT-1:0]     mux_cfg_d;
  logic [5:0]              mux_cfg_addr;
  logic                    mux_sel_load;
  logic [MUX_VW-1:0]       mux_load_val;

  pc_bitfile_store #(.DEPTH(MUX_DEP), .WIDTH(MUX_LANES)) u_mux_store (
    .clk, .wr_en(mux_st_we), .wr_addr(mux_st_addr), .wr_data(mux_st_data),
    .rd_en(mux_rd_en), .rd_addr(mux_rd_addr), .rd_data(mux_rd_data)
  );

  pc_reconfig_ctrl #(.NLUT(MUX_CP), .LANES(MUX_LANES), .LEN(MUX_LEN), .CW(1),
                     .NVAL(MUX_N)) u_mux_ctrl (
    .clk, .rst_n, .inval(mux_inval), .inval_val(mux_inval_val),
    .busy(mux_busy), .ready(mux_ready), .cur_val(mux_cur_val),
    .sel_load(mux_sel_load), .load_val(mux_load_val),
    .rd_en(mux_rd_en), .rd_addr(mux_rd_addr), .rd_data(mux_rd_data),
    .cfg_we(mux_ctl_we), .cfg_d(mux_ctl_d), .cfg_addr(mux_cfg_addr)
  );

  assign mux_cfg_we = MUX_NLUT'(mux_ctl_we);
  assign mux_cfg_d  = MUX_NLUT'(mux_ctl_d);

  pc_mux #(.N(MUX_N), .ARCH(MUX_ARCH), .CFG_CHAIN(MUX_CH)) u_mux (
    .clk, .rst_n, .cfg_we(mux_cfg_we), .cfg_d(mux_cfg_d), .cfg_addr(mux_cfg_addr),
    .sel_load(mux_sel_load), .pc_sel(mux_load_val), .d(mux_d), .y(mux_y)
  );

  // ---------------- four-input, two-output selector ----------------
  logic              m42_rd_en;
  logic [7:0]        m42_rd_addr;
  logic [1:0]        m42_rd_data;
  logic [0:0]        m42_cfg_we;
  logic [0:0][1:0]   m42_cfg_d;
  logic [5:0]        m42_cfg_addr_unused;
  logic              m42_sel_load_unused;
  logic [3:0]        m42_load_val_unused;

  pc_bitfile_store #(.DEPTH(M42_DEP), .WIDTH(2)) u_m42_store (
    .clk, .wr_en(m42_st_we), .wr_addr(m42_st_addr), .wr_data(m42_st_data),
    .rd_en(m42_rd_en), .rd_addr(m42_rd_addr), .rd_data(m42_rd_data)
  );

  pc_reconfig_ctrl #(.NLUT(1), .LANES(1), .LEN(16), .CW(2), .NVAL(16)) u_m42_ctrl (
    .clk, .rst_n, .inval(m42_inval), .inval_val(m42_inval_val),
    .busy(m42_busy), .ready(m42_ready), .cur_val(m42_cur_val),
    .sel_load(m42_sel_load_unused), .load_val(m42_load_val_unused),
    .rd_en(m42_rd_en), .rd_addr(m42_rd_addr), .rd_data(m42_rd_data),
    .cfg_we(m42_cfg_we), .cfg_d(m42_cfg_d), .cfg_addr(m42_cfg_addr_unused)
  );

  pc_mux4x2 u_m42 (
    .clk, .cfg_we(m42_cfg_we[0]), .cfg_d(m42_cfg_d[0]), .d(m42_d), .y(m42_y)
  );

endmodule
