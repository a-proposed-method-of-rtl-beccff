// proposed_adder: WIDTH-bit binary adder built from WIDTH/2 chained 2-bit
// adder units.
//
// Unit k adds bits 2k+1..2k of x and y and takes its carry from unit k-1
// (unit 0 takes cin); the carry out of the last unit is cout. Because every
// unit output is a function of at most five inputs (see adder2_unit), each
// unit is one look-up-table level deep, so the carry ripples across two bits
// per level: WIDTH/2 levels in all, half the depth of a chain of 1-bit full
// adders, at a cost of five 4-input LUTs per unit (40 for 16 bits).
//
// Interface: s + (cout << WIDTH) == x + y + cin. Purely combinational.
// WIDTH defaults to 16, the size of the worked example; it must be even. The
// chaining follows the method; the parameterised width is this design's.
module proposed_adder #(
  parameter int unsigned WIDTH = adder_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned UNITS = WIDTH / adder_pkg::UNIT_BITS;

  if (WIDTH == 0 || WIDTH % adder_pkg::UNIT_BITS != 0) begin : g_bad_width
    $error("proposed_adder: WIDTH must be a positive multiple of 2");
  end

  // carry[k] enters unit k; carry[UNITS] leaves the last unit.
  logic [UNITS:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < UNITS; k++) begin : g_unit
    adder2_unit u_add2 (
      .x  (x[2*k +: 2]),
      .y  (y[2*k +: 2]),
      .ci (carry[k]),
      .s  (s[2*k +: 2]),
      .co (carry[k+1])
    );
  end

  assign cout = carry[UNITS];

endmodule
