// vedic_2x2: 2x2-bit unsigned multiplier, the leaf of the Vedic multiplier tree.
//
// Urdhva-Tiryagbhyam ("vertically and crosswise") for two bits:
//   q[0] = a0 b0                     (vertical, right column)
//   q[1] = a1 b0 + a0 b1             (crosswise), carry c1
//   q[2] = a1 b1 + c1                (vertical, left column)
//   q[3] = carry of the q[2] sum
// Four one-bit products and two half adders, as in the original design's 2x2 block
// diagram and schematic. Purely combinational: q is valid one propagation
// delay after a and b change.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic p_a1b0, p_a0b1, p_a1b1;
  logic c1;

  assign q[0]   = a[0] & b[0];
  assign p_a1b0 = a[1] & b[0];
  assign p_a0b1 = a[0] & b[1];
  assign p_a1b1 = a[1] & b[1];

  half_adder u_ha_cross (.a(p_a1b0), .b(p_a0b1), .sum(q[1]), .carry(c1));
  half_adder u_ha_left  (.a(p_a1b1), .b(c1),     .sum(q[2]), .carry(q[3]));

endmodule
