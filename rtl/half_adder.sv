// half_adder: one-bit half adder, the carry stage of the 2x2 Vedic multiplier.
//
// sum = a xor b and carry = a and b. Purely combinational, no clock.
// The 2x2 multiplier uses two of these, as in the original design's 2x2 schematic;
// the gate-level form is the textbook one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
