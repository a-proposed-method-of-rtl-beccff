// adder2_unit_tb: exhaustive check of the 2-bit adder unit.
//
// Applies all 32 combinations of x[1:0], y[1:0], ci and compares {co, s}
// with the integer sum x + y + ci, worked out here with plain arithmetic.
// A watchdog ends the run with a failure if it has not finished in time.
module adder2_unit_tb;
  logic [1:0] x, y, s;
  logic       ci, co;
  int unsigned checks = 0, failures = 0;

  adder2_unit dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int unsigned expected;
      {x, y, ci} = 5'(v);
      #1;
      expected = int'(x) + int'(y) + int'(ci);
      checks++;
      if ({co, s} !== 3'(expected)) begin
        failures++;
        $display("FAIL x=%0d y=%0d ci=%0d: got co=%0d s=%0d, expected %0d",
                 x, y, ci, co, s, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
