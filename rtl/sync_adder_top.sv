// sync_adder_top: the 2-bit-unit adder used as the process layer of a
// synchronous system.
//
// Structure: input storage layer -> proposed_adder -> output storage layer.
// The input layer registers {x, y, cin}; the adder between the two layers is
// the only logic on the register-to-register path, so the clock period is set
// by its WIDTH/2 look-up-table levels. The output layer registers {cout, s}.
//
// Timing: operands presented before rising edge n are added during cycle n
// and {cout, s} show their sum after rising edge n+1 (latency 2 edges from
// input pin to output pin, one addition accepted per clock, no stalls).
// Reset (asynchronous, active low) clears both layers, so s = 0, cout = 0.
//
// The adder and the storage/process layering follow the method; the single
// input and output layer, the reset and the latency are this design's.
module sync_adder_top #(
  parameter int unsigned WIDTH = adder_pkg::ADDER_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  typedef struct packed {
    logic [WIDTH-1:0] x;
    logic [WIDTH-1:0] y;
    logic             cin;
  } operands_t;

  typedef struct packed {
    logic             cout;
    logic [WIDTH-1:0] s;
  } result_t;

  operands_t op_d, op_q;
  result_t   res_d, res_q;

  assign op_d = '{x: x, y: y, cin: cin};

  storage_layer #(.WIDTH($bits(operands_t))) u_in_layer (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (op_d),
    .q     (op_q)
  );

  proposed_adder #(.WIDTH(WIDTH)) u_adder (
    .x    (op_q.x),
    .y    (op_q.y),
    .cin  (op_q.cin),
    .s    (res_d.s),
    .cout (res_d.cout)
  );

  storage_layer #(.WIDTH($bits(result_t))) u_out_layer (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (res_d),
    .q     (res_q)
  );

  assign s    = res_q.s;
  assign cout = res_q.cout;

endmodule
