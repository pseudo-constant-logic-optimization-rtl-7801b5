// Testbench helpers: the "offline tool" that turns a pseudo-constant value
// into LUT truth tables and into configuration bit streams.
//
// These functions are written independently of the RTL from the arithmetic
// each circuit must perform; the testbenches use them both to fill the
// bitfile stores and as reference models.
//   adder_tab  tables of LUT j of the adder for operand b
//   cmp_tab    tables of LUT j of the comparator for operand b
//   mux_tab    table of LUT j of the mux for select s with K inputs per LUT
//   mux4x2_tab tables of the four-input, two-output selector, value {s1, s0}
//   cfg_bits   bits LUT takes in configuration clock c, for its mode:
//              RAM64 writes address c with t6[c]; SRL32 shifts t6[31-c];
//              SRL16X2 shifts t6[15-c] (O6 half) and t5[15-c] (O5 half).
package pc_tb_pkg;
  import pc_pkg::*;

  typedef struct packed {
    logic [63:0] t6;
    logic [63:0] t5;
  } tab_t;

  function automatic tab_t adder_tab(logic [95:0] b, int j);
    tab_t r = '0;
    int k = j / 2;
    logic [2:0] b3 = 3'(b >> (3*k));
    for (int x = 0; x < 16; x++) begin
      logic [3:0] t = 4'(x[2:0]) + 4'(b3) + 4'(x[3]);
      if (j % 2 == 0) begin r.t6[x] = t[0]; r.t5[x] = t[1]; end
      else            begin r.t6[x] = t[2]; r.t5[x] = t[3]; end
    end
    return r;
  endfunction

  function automatic tab_t cmp_tab(logic [63:0] b, int j);
    tab_t r = '0;
    logic [3:0] bg = 4'(b >> (4*j));
    for (int x = 0; x < 32; x++) begin
      logic [3:0] ag = x[3:0];
      r.t6[x] = (ag > bg) || ((ag == bg) && x[4]);
    end
    return r;
  endfunction

  function automatic tab_t mux_tab(int s, int k, int j);
    tab_t r = '0;
    if (s / k == j)
      for (int x = 0; x < (1 << k); x++) r.t6[x] = x[s % k];
    return r;
  endfunction

  // four-input, two-output selector: value v = {s1, s0}
  function automatic tab_t mux4x2_tab(int v);
    tab_t r = '0;
    for (int x = 0; x < 16; x++) begin
      r.t6[x] = x[v % 4];
      r.t5[x] = x[v / 4];
    end
    return r;
  endfunction

  function automatic logic [1:0] cfg_bits(lut_mode_e m, tab_t t, int c);
    case (m)
      LUT_RAM64: return {1'b0, t.t6[c]};
      LUT_SRL32: return {1'b0, t.t6[31-c]};
      default:   return {t.t5[15-c], t.t6[15-c]};
    endcase
  endfunction

  // Value a LUT should give on its O6 / O5 pins for read address x.
  function automatic logic [1:0] tab_read(lut_mode_e m, tab_t t, logic [5:0] x);
    case (m)
      LUT_RAM64: return {t.t6[{1'b0, x[4:0]}], t.t6[x]};
      LUT_SRL32: return {t.t6[x[4:0]], t.t6[x[4:0]]};
      default:   return {t.t5[x[3:0]], t.t6[x[3:0]]};
    endcase
  endfunction

endpackage
