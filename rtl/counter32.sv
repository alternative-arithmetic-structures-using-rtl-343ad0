// counter32: (3,2) counter, i.e. a full adder.
//
// x + y + z = 2c + s for single bits. Used in the carry-save level of the
// six-operand adder, the three-operand converter, the 8x8 multiplier and its
// ripple-carry adder. Purely combinational.
module counter32 (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule
