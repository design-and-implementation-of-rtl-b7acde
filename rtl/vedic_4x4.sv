// vedic_4x4: 4x4-bit unsigned Vedic (Urdhva-Tiryagbhyam) multiplier.
//
// The operands are split into 2-bit halves, a = {ah, al} and b = {bh, bl}.
// Four vedic_2x2 multipliers form the vertical products al*bl and ah*bh and the
// crosswise products ah*bl and al*bh, all at once; vedic_adder_tree then adds
// them with two 6-bit adders and one 4-bit adder. This is the
// structure of the original design's 4x4 block diagram. Unsigned operands, full
// 8-bit product, purely combinational: q settles one propagation delay
// after a or b changes, with no clock and no pipeline registers.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);

  localparam int unsigned H = 2;

  logic [2*H-1:0] q0, q1, q2, q3;

  vedic_2x2 u_mul_ll (.a(a[H-1:0]),   .b(b[H-1:0]),   .q(q0));  // al * bl
  vedic_2x2 u_mul_hl (.a(a[2*H-1:H]), .b(b[H-1:0]),   .q(q1));  // ah * bl
  vedic_2x2 u_mul_lh (.a(a[H-1:0]),   .b(b[2*H-1:H]), .q(q2));  // al * bh
  vedic_2x2 u_mul_hh (.a(a[2*H-1:H]), .b(b[2*H-1:H]), .q(q3));  // ah * bh

  vedic_adder_tree #(.H(H)) u_sum (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3),
    .q (q)
  );

endmodule
