// vedic_multi: four Vedic multipliers of different sizes behind a 4-to-1 selector.
//
// A 4x4, an 8x8, a 16x16 and a 32x32 Vedic multiplier run side by side on
// overlapping operand buses, and the two-bit sel input chooses which one's
// product is passed to the outputs:
//   sel = 00: out1 = a      * b[3:0]    (4x4)
//   sel = 01: out2 = b      * c[7:0]    (8x8)
//   sel = 10: out3 = c      * d[15:0]   (16x16)
//   sel = 11: out4 = d      * d         (32x32)
// sel[1] is the selection line S0 and sel[0] is S1 of the original design's table
// (S0 = 0, S1 = 1 picks 8x8). Each output has its own transparent latch,
// open while its size is selected and closed otherwise, so an output keeps
// the last product of its multiplier after sel moves on. The per-output
// latches and the operand pairing (which buses feed which multiplier) follow
// the original design; the operand width rule for the unused high bits (b[7:4],
// c[15:8], d[31:16] are ignored by the smaller multipliers) is read from its
// waveforms. There is no clock and no reset: an output that has never been
// selected holds whatever the latch powered up with.
//
// The four latches are intended: they are how the selector holds results.
// Synthesis and lint tools report them as latches.
module vedic_multi
  import vedic_pkg::*;
(
  input  logic [3:0]  a,
  input  logic [7:0]  b,
  input  logic [15:0] c,
  input  logic [31:0] d,
  input  logic [1:0]  sel,
  output logic [7:0]  out1,
  output logic [15:0] out2,
  output logic [31:0] out3,
  output logic [63:0] out4
);

  size_sel_e size;
  logic [7:0]  prod4;
  logic [15:0] prod8;
  logic [31:0] prod16;
  logic [63:0] prod32;

  assign size = size_sel_e'(sel);

  vedic_4x4   u_mul4  (.a(a), .b(b[3:0]),  .q(prod4));
  vedic_8x8   u_mul8  (.a(b), .b(c[7:0]),  .q(prod8));
  vedic_16x16 u_mul16 (.a(c), .b(d[15:0]), .q(prod16));
  vedic_32x32 u_mul32 (.a(d), .b(d),       .q(prod32));

  always_latch begin
    if (size == SEL_4X4) out1 = prod4;
  end

  always_latch begin
    if (size == SEL_8X8) out2 = prod8;
  end

  always_latch begin
    if (size == SEL_16X16) out3 = prod16;
  end

  always_latch begin
    if (size == SEL_32X32) out4 = prod32;
  end

endmodule
