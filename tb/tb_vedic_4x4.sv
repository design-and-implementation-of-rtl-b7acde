// tb_vedic_4x4: self-check of the 4x4 Vedic multiplier.
// All 256 operand pairs, plus the published example and board vectors and
// the worked three-bit example 101 x 110 = 011110, zero-extended to 4 bits.
// Expected products come from 64-bit (or, for 32x32, 128-bit) integer
// multiplication in the testbench. The multiplier is combinational, so each
// product is sampled 1 ns after the operands are applied.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] q;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] x, input logic [3:0] y);
    logic [127:0] expected;
    a = x;
    b = y;
    expected = 128'(x) * 128'(y);
    #1;
    checks++;
    if (q !== expected[7:0]) begin
      failures++;
      $display("FAIL %h x %h -> %h, expected %h", x, y, q, expected[7:0]);
    end
  endtask

  task automatic check_vector(input logic [3:0] x, input logic [3:0] y,
                              input logic [7:0] expected);
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
    check_vector(4'b0101, 4'b1010, 8'b0011_0010);
    check_vector(4'b1101, 4'b0100, 8'b0011_0100);
    check_vector(4'b1010, 4'b1110, 8'b1000_1100);  // board demonstration
    check_vector(4'b0101, 4'b0110, 8'b0001_1110);  // worked 3-bit example 101 x 110
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(4'(i), 4'(j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
