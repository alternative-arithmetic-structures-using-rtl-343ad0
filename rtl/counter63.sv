// counter63: (6,3) counter.
//
// Counts the ones among six bits of equal weight and returns the count
// s = s2 s1 s0 (0..6). It is the single building block of the double
// carry-save (DCS) arithmetic: on a 6-input-LUT FPGA each output bit is one
// LUT, so a (6,3) counter is one LUT level. The reference design spells the
// counter out as a 64-entry case table; this module states the same function
// as a sum, which synthesis maps to the same three LUTs.
// Purely combinational.
module counter63
  import arith_pkg::*;
(
  input  logic [5:0] x,
  output logic [2:0] s
);
  assign s = ones6(x);
endmodule
