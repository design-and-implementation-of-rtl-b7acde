// tb_vedic_multi: end-to-end self-check of the selectable Vedic multiplier.
//
// The top level is used exactly as built (it has no parameters). First the
// published four-step waveform is replayed: sel = 00, 01, 10, 11 in turn with
// the operands shown there, and each output must show its product and then
// hold it while the other sizes are selected and the buses change. Then
// 4000 random steps drive random sel codes and operands. A reference model
// keeps, for every output, the last product formed while that output's size
// was selected; every output that has been selected at least once must match
// it after every step.
//
// Counted mechanisms: each of the four size selections, an output following
// an operand change while selected (transparent), and an output keeping its
// value while its operands change under another selection (hold). A mechanism
// that never happens counts as a failure.
module tb_vedic_multi;
  import vedic_pkg::*;

  logic [3:0]  a;
  logic [7:0]  b;
  logic [15:0] c;
  logic [31:0] d;
  logic [1:0]  sel;
  logic [7:0]  out1;
  logic [15:0] out2;
  logic [31:0] out3;
  logic [63:0] out4;

  int checks = 0, failures = 0;

  // Reference model state.
  logic [7:0]  exp1;
  logic [15:0] exp2;
  logic [31:0] exp3;
  logic [63:0] exp4;
  bit   seen [4];

  // Mechanism counters.
  int n_select [4];
  int n_transparent;
  int n_hold;

  vedic_multi dut (
    .a(a), .b(b), .c(c), .d(d), .sel(sel),
    .out1(out1), .out2(out2), .out3(out3), .out4(out4)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one step and compare all outputs with the reference model.
  task automatic step(input logic [1:0] s, input logic [3:0] na, input logic [7:0] nb,
                      input logic [15:0] nc, input logic [31:0] nd);
    logic [7:0]  p1;
    logic [15:0] p2;
    logic [31:0] p3;
    logic [63:0] p4;
    logic [1:0]  prev_sel = sel;

    p1 = 8'(na) * 8'(nb[3:0]);
    p2 = 16'(nb) * 16'(nc[7:0]);
    p3 = 32'(nc) * 32'(nd[15:0]);
    p4 = 64'(nd) * 64'(nd);

    // Mechanism bookkeeping, before the model is updated.
    n_select[s]++;
    if (seen[s] && prev_sel == s) begin
      case (size_sel_e'(s))
        SEL_4X4:   if (p1 != exp1) n_transparent++;
        SEL_8X8:   if (p2 != exp2) n_transparent++;
        SEL_16X16: if (p3 != exp3) n_transparent++;
        SEL_32X32: if (p4 != exp4) n_transparent++;
      endcase
    end
    if (s != 2'd0 && seen[0] && p1 != exp1) n_hold++;
    if (s != 2'd1 && seen[1] && p2 != exp2) n_hold++;
    if (s != 2'd2 && seen[2] && p3 != exp3) n_hold++;
    if (s != 2'd3 && seen[3] && p4 != exp4) n_hold++;

    case (size_sel_e'(s))
      SEL_4X4:   exp1 = p1;
      SEL_8X8:   exp2 = p2;
      SEL_16X16: exp3 = p3;
      SEL_32X32: exp4 = p4;
    endcase
    seen[s] = 1'b1;

    sel = s; a = na; b = nb; c = nc; d = nd;
    #1;
    if (seen[0]) begin
      checks++;
      if (out1 !== exp1) begin failures++; $display("FAIL out1=%h expected %h (sel=%b)", out1, exp1, s); end
    end
    if (seen[1]) begin
      checks++;
      if (out2 !== exp2) begin failures++; $display("FAIL out2=%h expected %h (sel=%b)", out2, exp2, s); end
    end
    if (seen[2]) begin
      checks++;
      if (out3 !== exp3) begin failures++; $display("FAIL out3=%h expected %h (sel=%b)", out3, exp3, s); end
    end
    if (seen[3]) begin
      checks++;
      if (out4 !== exp4) begin failures++; $display("FAIL out4=%h expected %h (sel=%b)", out4, exp4, s); end
    end
  endtask

  task automatic expect_value(input string what, input logic [63:0] got, input logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL published %s = %h, expected %h", what, got, want);
    end
  endtask

  initial begin
    sel = 2'b00;
    // Published waveform, step by step.
    step(2'b00, 4'b1010, 8'b0000_1011, 16'h0000, 32'h0000_0000);
    expect_value("out1", 64'(out1), 64'b0110_1110);
    step(2'b01, 4'b1010, 8'b1111_1011, 16'h00AA, 32'h0000_0000);
    expect_value("out2", 64'(out2), 64'hA6AE);
    step(2'b10, 4'b0000, 8'b0000_0000, 16'hF0F0, 32'h0000_A5C3);
    expect_value("out3", 64'(out3), 64'h9C02_36D0);
    step(2'b11, 4'b0000, 8'b0000_0000, 16'h0000, 32'h0001_76D7);
    expect_value("out4", out4, 64'h0000_0002_24D8_E891);
    expect_value("out1 held", 64'(out1), 64'b0110_1110);
    expect_value("out2 held", 64'(out2), 64'hA6AE);

    // Random operation. sel is kept for a few steps at a time so that both
    // transparency and hold are exercised.
    for (int i = 0; i < 4000; i++) begin
      automatic logic [1:0] s = (i % 3 == 0) ? 2'($urandom) : sel;
      step(s, 4'($urandom), 8'($urandom), 16'($urandom), {$urandom});
    end

    for (int k = 0; k < 4; k++) begin
      $display("size select %0d happened %0d times", k, n_select[k]);
      if (n_select[k] == 0) failures++;
    end
    $display("transparent updates: %0d, holds: %0d", n_transparent, n_hold);
    if (n_transparent == 0) failures++;
    if (n_hold == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
