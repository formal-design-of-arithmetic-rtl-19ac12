// full_adder: one-bit (3,2) counter, 2*c + s = x + y + z.
//
// The sum is the three-input XOR and the carry the majority function,
// written as x&y | (x|y)&z, which is the logic-level description the
// arithmetic library gives for its full adder. Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | ((x | y) & z);
endmodule
