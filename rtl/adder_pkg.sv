// adder_pkg: constants shared by the 2-bit-unit adder and its synchronous
// wrapper.
//
// The adder is cut into units of UNIT_BITS = 2 bits; each unit's outputs are
// functions of at most five inputs, which is what lets every output fit one
// or two 4-input look-up tables and one look-up-table delay. ADDER_WIDTH = 16
// is the operand width of the worked example the design is sized for.
package adder_pkg;
  localparam int unsigned UNIT_BITS   = 2;
  localparam int unsigned ADDER_WIDTH = 16;
endpackage
