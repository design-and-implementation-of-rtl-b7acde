// tb_vedic_16x16: self-check of the 16x16 Vedic multiplier.
// Published example vectors, carry-chain corners and 20000 random pairs.
// Expected products come from 64-bit (or, for 32x32, 128-bit) integer
// multiplication in the testbench. The multiplier is combinational, so each
// product is sampled 1 ns after the operands are applied.
module tb_vedic_16x16;
  logic [15:0] a, b;
  logic [31:0] q;
  int checks = 0, failures = 0;

  vedic_16x16 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [127:0] expected;
    a = x;
    b = y;
    expected = 128'(x) * 128'(y);
    #1;
    checks++;
    if (q !== expected[31:0]) begin
      failures++;
      $display("FAIL %h x %h -> %h, expected %h", x, y, q, expected[31:0]);
    end
  endtask

  task automatic check_vector(input logic [15:0] x, input logic [15:0] y,
                              input logic [31:0] expected);
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
    check_vector(16'b1010_1010_1010_1010, 16'b0000_1111_0000_1111, 32'h0A09_F5F6);
    check_vector(16'b0101_0101_0101_0101, 16'b1111_0000_1111_0000, 32'h504F_AFB0);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    check(16'(1) << 15, 16'(1) << 15);
    check('1, 16'(1));
    for (int i = 0; i < 20000; i++)
      check(16'({$urandom, $urandom}), 16'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
