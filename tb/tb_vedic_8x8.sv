// tb_vedic_8x8: self-check of the 8x8 Vedic multiplier.
// All 65536 operand pairs, plus the published example and board vectors.
// Expected products come from 64-bit (or, for 32x32, 128-bit) integer
// multiplication in the testbench. The multiplier is combinational, so each
// product is sampled 1 ns after the operands are applied.
module tb_vedic_8x8;
  logic [7:0] a, b;
  logic [15:0] q;
  int checks = 0, failures = 0;

  vedic_8x8 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] x, input logic [7:0] y);
    logic [127:0] expected;
    a = x;
    b = y;
    expected = 128'(x) * 128'(y);
    #1;
    checks++;
    if (q !== expected[15:0]) begin
      failures++;
      $display("FAIL %h x %h -> %h, expected %h", x, y, q, expected[15:0]);
    end
  endtask

  task automatic check_vector(input logic [7:0] x, input logic [7:0] y,
                              input logic [15:0] expected);
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
    check_vector(8'b0101_0101, 8'b1010_1010, 16'b0011_1000_0111_0010);
    check_vector(8'b0110_0111, 8'b1101_0100, 16'b0101_0101_0100_1100);
    check_vector(8'hFF, 8'hFF, 16'b1111_1110_0000_0001);  // board demonstration
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check(8'(i), 8'(j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
