// mv_level_decode: comparator and output stage of the binary-restored
// multi-valued counter (shared by mv_counter73 and mv_adder2).
//
// The input is the level 0..7 of the summed input current. A first
// comparator gives vo = (level > 3). Three more comparators sense levels 1,
// 2 and 3 of the level itself or, when vo is set, of level - 4 (in the
// circuit the comparison inputs are multiplexed by vo). Then
//   s2 = vo,  s1 = vout2,  s0 = vout1 & ~vout2 | vout3.
// Carry and the low bits are resolved in parallel, so no MV-to-binary
// conversion follows the counter. Combinational.
module mv_level_decode (
  input  logic [2:0] level,
  output logic [2:0] s
);
  logic       vo, v1, v2, v3;
  logic [2:0] l;

  assign vo = (level > 3'd3);
  assign l  = vo ? level - 3'd4 : level;
  assign v1 = (l >= 3'd1);
  assign v2 = (l >= 3'd2);
  assign v3 = (l >= 3'd3);
  assign s  = {vo, v2, (v1 & ~v2) | v3};
endmodule
