// mv_counter_mvout: seven-input counter with a multi-valued output.
//
// Counts the ones among seven bits like a (7,3) counter, but only the top
// bit is given in binary (cout = s2, count >= 4); the two low bits s1 s0 are
// given as one four-level digit `out` in 0..3. In the original circuit that
// digit is a current of 1..4 unit steps that can feed further multi-valued
// stages directly; here it is a 2-bit integer. Combinational.
module mv_counter_mvout
  import arith_pkg::*;
(
  input  logic [6:0] x,
  output logic       cout,
  output logic [1:0] out
);
  logic [2:0] cnt;
  assign cnt  = ones7(x);
  assign cout = (cnt >= 3'd4);
  assign out  = cout ? 2'(cnt - 3'd4) : cnt[1:0];
endmodule
