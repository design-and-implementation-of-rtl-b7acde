// tb_vedic_32x32: self-check of the 32x32 Vedic multiplier.
// Published example vector, carry-chain corners and 20000 random pairs.
// Expected products come from 64-bit (or, for 32x32, 128-bit) integer
// multiplication in the testbench. The multiplier is combinational, so each
// product is sampled 1 ns after the operands are applied.
module tb_vedic_32x32;
  logic [31:0] a, b;
  logic [63:0] q;
  int checks = 0, failures = 0;

  vedic_32x32 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [127:0] expected;
    a = x;
    b = y;
    expected = 128'(x) * 128'(y);
    #1;
    checks++;
    if (q !== expected[63:0]) begin
      failures++;
      $display("FAIL %h x %h -> %h, expected %h", x, y, q, expected[63:0]);
    end
  endtask

  task automatic check_vector(input logic [31:0] x, input logic [31:0] y,
                              input logic [63:0] expected);
    a = x;
    b = y;
    #1;
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL published vector %h x %h -> %h, expected %h", x, y, q, expected);
    end
  endtask

  initial begin
    check_vector(32'h1234_5000, 32'h0000_1234, 64'h0000_014B_6040_4000);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    check(32'(1) << 31, 32'(1) << 31);
    check('1, 32'(1));
    for (int i = 0; i < 20000; i++)
      check(32'({$urandom, $urandom}), 32'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
