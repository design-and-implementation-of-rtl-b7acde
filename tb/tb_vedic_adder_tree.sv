// tb_vedic_adder_tree: self-check of the partial-product adder tree.
// Operands a = {ah, al} and b = {bh, bl} are chosen, the four partial
// products are formed with integer multiplication and fed in, and the
// output must equal a*b. The default H = 2 tree (the 4x4 level) is checked
// for all 256 operand pairs; an H = 16 tree (the 32x32 level) on corner and
// random operands.
module tb_vedic_adder_tree;
  logic [3:0]  q0s, q1s, q2s, q3s;
  logic [7:0]  qs;
  logic [31:0] q0l, q1l, q2l, q3l;
  logic [63:0] ql;
  int checks = 0, failures = 0;

  vedic_adder_tree               dut_s (.q0(q0s), .q1(q1s), .q2(q2s), .q3(q3s), .q(qs));
  vedic_adder_tree #(.H(16))     dut_l (.q0(q0l), .q1(q1l), .q2(q2l), .q3(q3l), .q(ql));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_l(input logic [31:0] x, input logic [31:0] y);
    longint unsigned expected;
    q0l = 32'(x[15:0])  * 32'(y[15:0]);
    q1l = 32'(x[31:16]) * 32'(y[15:0]);
    q2l = 32'(x[15:0])  * 32'(y[31:16]);
    q3l = 32'(x[31:16]) * 32'(y[31:16]);
    expected = longint'(x) * longint'(y);
    #1;
    checks++;
    if (ql !== expected) begin
      failures++;
      $display("FAIL H=16 %h x %h -> %h, expected %h", x, y, ql, expected);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        q0s = 4'((x % 4) * (y % 4));
        q1s = 4'((x / 4) * (y % 4));
        q2s = 4'((x % 4) * (y / 4));
        q3s = 4'((x / 4) * (y / 4));
        #1;
        checks++;
        if (qs !== 8'(x * y)) begin
          failures++;
          $display("FAIL H=2 %0d x %0d -> %0d", x, y, qs);
        end
      end
    end
    check_l(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check_l(32'hFFFF_0000, 32'h0000_FFFF);
    check_l(32'h0000_FFFF, 32'hFFFF_0000);
    for (int i = 0; i < 2000; i++)
      check_l($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
