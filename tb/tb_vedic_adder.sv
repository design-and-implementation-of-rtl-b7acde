// tb_vedic_adder: self-check of the partial-product adder.
// The default 4-bit adder is checked exhaustively; a 48-bit copy, the widest
// the 32x32 multiplier uses, is checked on random and carry-chain corner
// operands. Expected sums are computed with 64-bit integer addition and
// truncated to the adder width.
module tb_vedic_adder;
  logic [3:0]  a4, b4, s4;
  logic [47:0] a48, b48, s48;
  int checks = 0, failures = 0;

  vedic_adder              dut4  (.a(a4),  .b(b4),  .sum(s4));
  vedic_adder #(.WIDTH(48)) dut48 (.a(a48), .b(b48), .sum(s48));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check48(input logic [47:0] x, input logic [47:0] y);
    longint unsigned expected;
    a48 = x;
    b48 = y;
    expected = (longint'(x) + longint'(y)) & 64'hFFFF_FFFF_FFFF;
    #1;
    checks++;
    if (s48 !== expected[47:0]) begin
      failures++;
      $display("FAIL 48-bit %h + %h -> %h, expected %h", x, y, s48, expected[47:0]);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (s4 !== 4'(i + j)) begin
          failures++;
          $display("FAIL 4-bit %0d + %0d -> %0d", i, j, s4);
        end
      end
    end
    check48(48'hFFFF_FFFF_FFFF, 48'h1);
    check48(48'h7FFF_FFFF_FFFF, 48'h1);
    check48(48'h0, 48'h0);
    for (int i = 0; i < 2000; i++)
      check48(48'({$urandom, $urandom}), 48'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
