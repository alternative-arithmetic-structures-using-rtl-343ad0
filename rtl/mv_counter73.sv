// mv_counter73: binary-restored multi-valued (7,3) counter.
//
// Binary inputs, binary outputs: s2 s1 s0 = number of ones among x[6:0].
// Inside, the seven inputs are summed as currents (level 0..7) and the
// output bits are restored by comparators (mv_level_decode): s2 is the
// level > 3 decision, s1 and s0 come from three comparators that look at the
// level or at level - 4. It replaces four full adders in a multiplier's
// reduction tree. The level sum is this design's binary stand-in for the
// current summation of the original circuit. Combinational.
module mv_counter73
  import arith_pkg::*;
(
  input  logic [6:0] x,
  output logic [2:0] s
);
  mv_level_decode u_dec (.level(ones7(x)), .s(s));
endmodule
