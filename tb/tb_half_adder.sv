// tb_half_adder: exhaustive self-check of the one-bit half adder.
// All four input pairs are applied; sum and carry are compared with the
// two-bit result of adding the inputs as integers.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      int unsigned expected;
      {a, b} = 2'(i);
      expected = int'(a) + int'(b);
      #1;
      checks++;
      if ({carry, sum} !== 2'(expected)) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> carry=%0d sum=%0d", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
