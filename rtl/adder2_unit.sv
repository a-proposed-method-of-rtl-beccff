// adder2_unit: 2-bit adder unit, the building block of the adder.
//
// Adds the 2-bit slices x = {x[i+1], x[i]} and y = {y[i+1], y[i]} of two
// operands and a carry-in ci, giving two sum bits s and the carry out of the
// upper bit, co. Each output is written as a single exclusive-OR of product
// terms of its inputs, so that no output depends on more than five inputs:
//
//   s[0] = x0 ^ y0 ^ ci                                    (3 inputs)
//   s[1] = x1 ^ y1 ^ x0 y0 ^ x0 ci ^ y0 ci                 (5 inputs)
//   co   = x1 y1 ^ x1 x0 y0 ^ x1 x0 ci ^ x1 y0 ci
//              ^ y1 x0 y0 ^ y1 x0 ci ^ y1 y0 ci            (5 inputs)
//
// The three XORed products x0 y0 ^ x0 ci ^ y0 ci are the majority of x0, y0,
// ci, i.e. the carry into bit i+1, so the unit never forms that carry as a
// separate signal: on a 4-input-LUT FPGA a 3-input output takes one LUT and
// a 5-input output two LUTs joined by the slice's F5 multiplexer, each one
// LUT level deep. The carry therefore crosses two bits per logic level.
//
// The equations follow the method this adder is built on. The carry
// equation is the seven-term expansion of maj(x1, y1, maj(x0, y0, ci)); an
// eighth term x0 y0 ci is left out because it makes 0 + 0 + 1 + 1 + 1 carry.
//
// Purely combinational; no clock.
module adder2_unit (
  input  logic [1:0] x,   // {x_{i+1}, x_i}
  input  logic [1:0] y,   // {y_{i+1}, y_i}
  input  logic       ci,  // carry into bit i
  output logic [1:0] s,   // {s_{i+1}, s_i}
  output logic       co   // carry out of bit i+1
);

  always_comb begin
    s[0] = x[0] ^ y[0] ^ ci;

    s[1] = x[1] ^ y[1]
         ^ (x[0] & y[0]) ^ (x[0] & ci) ^ (y[0] & ci);

    co   = (x[1] & y[1])
         ^ (x[1] & x[0] & y[0]) ^ (x[1] & x[0] & ci) ^ (x[1] & y[0] & ci)
         ^ (y[1] & x[0] & y[0]) ^ (y[1] & x[0] & ci) ^ (y[1] & y[0] & ci);
  end

endmodule
