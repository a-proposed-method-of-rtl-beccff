// proposed_adder_tb: self-checking test of the 16-bit adder made of 2-bit
// units, at its default width.
//
// Corner cases first (zero, all ones, carry-in rippling through every unit,
// carry generated in each unit in turn), then random operands. Each result
// {cout, s} is compared with x + y + cin computed in 17-bit arithmetic here.
// The test also counts how often the carry ran the whole length of the chain
// and how often cout was set, and fails if either never happened.
module proposed_adder_tb;
  localparam int unsigned W = 16;

  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int unsigned checks = 0, failures = 0;
  int unsigned full_ripples = 0, carry_outs = 0;

  proposed_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b,
                       input logic c);
    logic [W:0] expected;
    x = a; y = b; cin = c;
    #1;
    expected = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, c};
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      $display("FAIL %h + %h + %0d: got cout=%0d s=%h, expected %h",
               a, b, c, cout, s, expected);
    end
    if ((a ^ b) == {W{1'b1}} && c) full_ripples++;
    if (cout) carry_outs++;
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);           // carry ripples through all 8 units
    apply(16'h5555, 16'hAAAA, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    // a carry generated in each unit, propagated to the top
    for (int k = 0; k < W / 2; k++) begin
      apply(W'(3) << (2 * k), '1 << (2 * k), 1'b0);
      apply(W'(1) << (2 * k + 1), ~(W'(1) << (2 * k + 1)) | (W'(1) << (2 * k + 1)), 1'b0);
    end
    for (int n = 0; n < 20000; n++)
      apply(W'($urandom), W'($urandom), 1'($urandom));

    checks++;
    if (full_ripples == 0) begin failures++; $display("FAIL no full-length ripple"); end
    checks++;
    if (carry_outs == 0) begin failures++; $display("FAIL no carry out"); end
    $display("full-length ripples=%0d carry outs=%0d", full_ripples, carry_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
