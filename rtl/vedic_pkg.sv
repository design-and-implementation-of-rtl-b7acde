// vedic_pkg: shared definitions for the Vedic (Urdhva-Tiryagbhyam) multiplier family.
//
// The top level, vedic_multi, selects one of four multiplier sizes with a
// two-bit code. The code-to-size table (00 -> 4x4, 01 -> 8x8, 10 -> 16x16,
// 11 -> 32x32) follows the original design's selection table; naming the codes as an
// enum is this implementation's choice.
package vedic_pkg;

  // Operand width selected by the top level's sel input.
  typedef enum logic [1:0] {
    SEL_4X4   = 2'b00,
    SEL_8X8   = 2'b01,
    SEL_16X16 = 2'b10,
    SEL_32X32 = 2'b11
  } size_sel_e;

endpackage
