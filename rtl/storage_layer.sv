// storage_layer: one storage layer of a synchronous pipeline.
//
// A synchronous system alternates storage layers and process layers; all
// storage layers share one clock and hold the data a process layer reads or
// has produced, so the clock period only has to cover the slowest process
// layer plus the register's own timing. This layer is a WIDTH-bit bank of
// rising-edge D flip-flops: q takes d at every rising edge of clk.
//
// The asynchronous active-low reset to zero is this design's choice; the
// method only asks for registers on a common clock.
module storage_layer #(
  parameter int unsigned WIDTH = adder_pkg::ADDER_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
