// sync_adder_top_tb: end-to-end test of the synchronous adder at its default
// parameters (16 bits).
//
// A new random operand pair is presented on every clock, back to back, and a
// scoreboard queue predicts each result from x + y + cin worked out here. The
// result of the operands applied before edge n must be on s/cout right after
// edge n+1 (two-edge latency, one addition per clock). Reset is checked to
// clear the outputs. Corner operands are mixed in, and the test counts the
// events the adder is built around: a carry generated in the low unit that
// ripples through all eight units, a carry out of the top unit, and carry-in
// use; any of them that never happened counts as a failure.
module sync_adder_top_tb;
  localparam int unsigned W = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] x = '0, y = '0, s;
  logic         cin = 1'b0, cout;
  int unsigned  checks = 0, failures = 0;
  int unsigned  full_ripples = 0, carry_outs = 0, carry_ins = 0, resets = 0;
  logic [W:0]   pipe[2];      // expected {cout, s}, in flight
  bit           pipe_valid[2];

  sync_adder_top dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .cin(cin),
                      .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic [W-1:0] a, input logic [W-1:0] b,
                       input logic c);
    x = a; y = b; cin = c;
    if ((a ^ b) == {W{1'b1}} && c) full_ripples++;
    if (c) carry_ins++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({cout, s} !== '0) begin failures++; $display("FAIL outputs not cleared by reset"); end
    else resets++;
    rst_n = 1'b1;
    pipe_valid[0] = 1'b0;
    pipe_valid[1] = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      case (n % 7)
        0: drive('1, W'(0), 1'b1);
        1: drive(W'($urandom), ~W'(0), 1'($urandom));
        default: drive(W'($urandom), W'($urandom), 1'($urandom));
      endcase
      @(posedge clk);
      // operands captured now; their sum appears after the next edge
      pipe[1] = pipe[0];  pipe_valid[1] = pipe_valid[0];
      pipe[0] = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, cin};
      pipe_valid[0] = 1'b1;
      #1;
      if (pipe_valid[1]) begin
        checks++;
        if ({cout, s} !== pipe[1]) begin
          failures++;
          $display("FAIL cycle %0d: got %h expected %h", n, {cout, s}, pipe[1]);
        end
        if (cout) carry_outs++;
      end
    end
    // reset in the middle of traffic clears the outputs
    rst_n = 1'b0;
    #1;
    checks++;
    if ({cout, s} !== '0) begin failures++; $display("FAIL reset did not clear outputs"); end
    else resets++;

    $display("full-length ripples=%0d carry outs=%0d carry ins=%0d resets=%0d",
             full_ripples, carry_outs, carry_ins, resets);
    checks += 4;
    if (full_ripples == 0) begin failures++; $display("FAIL no full-length ripple"); end
    if (carry_outs == 0)   begin failures++; $display("FAIL no carry out"); end
    if (carry_ins == 0)    begin failures++; $display("FAIL no carry in"); end
    if (resets < 2)        begin failures++; $display("FAIL reset not seen twice"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
