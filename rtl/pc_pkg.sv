// Shared types and constants for the pseudo-constant logic library.
//
// A pseudo-constant is an operand that changes rarely. Instead of feeding it
// into generic logic, its value is folded into the truth tables of
// reconfigurable LUTs; when it changes ("invalidation") a precomputed bitfile
// for the new value is loaded into those LUTs.
//
// lut_mode_e names the three ways the six-input, two-output LUT can be used as
// a reconfigurable primitive (64x1 RAM, one 32-bit shift register, two 16-bit
// shift registers). arch_e names the two target fabrics: a Virtex-5 style
// slice and the modified slice with a separate LUT-RAM write address.
package pc_pkg;

  typedef enum logic [1:0] {
    LUT_RAM64  = 2'd0,   // 64x1 RAM, addressed write, six read inputs
    LUT_SRL32  = 2'd1,   // one 32-bit shift register, five read inputs
    LUT_SRL16X2 = 2'd2   // two 16-bit shift registers, four read inputs each
  } lut_mode_e;

  typedef enum logic {
    ARCH_V5       = 1'b0, // stock Virtex-5 style slice
    ARCH_MODIFIED = 1'b1  // slice with extra LUT-RAM write-address pins
  } arch_e;

  localparam int unsigned LUTS_PER_SLICE = 4;  // LUTs A, B, C and D

  // Configuration cycles needed to fill one LUT in a given mode.
  function automatic int unsigned cfg_len(lut_mode_e m);
    case (m)
      LUT_RAM64:   return 64;
      LUT_SRL32:   return 32;
      default:     return 16;
    endcase
  endfunction

  // Bits delivered to one LUT per configuration cycle in a given mode.
  function automatic int unsigned cfg_width(lut_mode_e m);
    return (m == LUT_SRL16X2) ? 2 : 1;
  endfunction

endpackage
