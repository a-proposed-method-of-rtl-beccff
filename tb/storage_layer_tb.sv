// storage_layer_tb: self-checking test of one storage layer (register bank).
//
// Checks that reset clears q, that q takes d at each rising edge and holds
// it for the whole cycle (d is changed in mid-cycle and q must not follow),
// and that an asynchronous reset clears q without a clock edge.
module storage_layer_tb;
  localparam int unsigned W = 16;

  logic         clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] d, q, expected;
  int unsigned  checks = 0, failures = 0;

  storage_layer dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, want);
    end
  endtask

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'hFFFF;
    #1 rst_n = 1'b0;          // assert reset before the first clock edge
    #1;
    check('0, "during reset");
    @(posedge clk); #1;
    check('0, "clock during reset");
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      d = W'($urandom);
      expected = d;
      @(posedge clk); #1;
      check(expected, "after edge");
      d = ~expected;         // change d in mid-cycle
      #3;
      check(expected, "hold in cycle");
    end
    #1 rst_n = 1'b0;          // away from any clock edge
    #1;
    check('0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
