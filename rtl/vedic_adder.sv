// vedic_adder: WIDTH-bit binary adder used to sum partial products.
//
// sum = (a + b) mod 2**WIDTH. The carry out is dropped: every adder in the
// Vedic multipliers is sized so that its true sum always fits in WIDTH bits
// (see vedic_adder_tree). The design uses widths 4, 6, 8, 12, 16, 24, 32
// and 48; it says only that these are adders, so the add is left to the
// synthesis tool's carry chain. Purely combinational, no clock.
module vedic_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b;

endmodule
