// tb_vedic_2x2: exhaustive self-check of the 2x2 Vedic multiplier.
// All 16 operand pairs are compared with integer multiplication, after the
// published example vectors 00 x 00 = 0000, 01 x 11 = 0011 and
// 10 x 11 = 0110 are applied explicitly.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [1:0] x, input logic [1:0] y, input logic [3:0] expected);
    a = x;
    b = y;
    #1;
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %b x %b -> %b, expected %b", x, y, q, expected);
    end
  endtask

  initial begin
    check(2'b00, 2'b00, 4'b0000);
    check(2'b01, 2'b11, 4'b0011);
    check(2'b10, 2'b11, 4'b0110);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        check(2'(i), 2'(j), 4'(i * j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
