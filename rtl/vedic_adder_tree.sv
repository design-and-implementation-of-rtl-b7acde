// vedic_adder_tree: sums the four partial products of one Vedic multiplier level.
//
// A 2H x 2H product is split as a = {ah, al}, b = {bh, bl} with H-bit halves:
//   q0 = al*bl, q1 = ah*bl, q2 = al*bh, q3 = ah*bh   (each 2H bits)
// and a*b = q3<<2H + (q1 + q2)<<H + q0. Three adders form it, as in the
// original design's block diagrams:
//   adder 1 (3H bits): {q3, H zeros} + {H zeros, q2}
//   adder 2 (2H bits): q1 + {H zeros, q0[2H-1:H]}
//   adder 3 (3H bits): adder 1 + {H zeros, adder 2}  -> q[4H-1:H]
//   q[H-1:0] = q0[H-1:0]
// None of the three can overflow: adder 1 is below (2^H+1)(2^H-1)^2 < 2^3H,
// adder 2 below 2^2H, adder 3 equals a*b >> H < 2^3H. So carry outs are not
// needed. H = 2, 4, 8, 16 give the 4x4, 8x8, 16x16 and 32x32 levels (adder
// widths 6/4/6, 12/8/12, 24/16/24, 48/32/48). Purely combinational.
// The original design draws these adders inside each multiplier; gathering
// them into one parameterised module is this implementation's choice.
module vedic_adder_tree #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] q
);

  logic [3*H-1:0] s_high;   // adder 1
  logic [2*H-1:0] s_mid;    // adder 2
  logic [3*H-1:0] s_total;  // adder 3

  vedic_adder #(.WIDTH(3*H)) u_add_high (
    .a  ({q3, {H{1'b0}}}),
    .b  ({{H{1'b0}}, q2}),
    .sum(s_high)
  );

  vedic_adder #(.WIDTH(2*H)) u_add_mid (
    .a  (q1),
    .b  ({{H{1'b0}}, q0[2*H-1:H]}),
    .sum(s_mid)
  );

  vedic_adder #(.WIDTH(3*H)) u_add_total (
    .a  (s_high),
    .b  ({{H{1'b0}}, s_mid}),
    .sum(s_total)
  );

  assign q = {s_total, q0[H-1:0]};

endmodule
