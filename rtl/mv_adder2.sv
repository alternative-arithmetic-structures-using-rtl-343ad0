// mv_adder2: two-bit adder built on the multi-valued counter.
//
// s = x + y + ci for 2-bit x, y. It reuses the comparator and output stage
// of the (7,3) counter; only the input stage differs: x0, y0 and ci add one
// unit each and x1, y1 two units each, so the summed level is the
// arithmetic sum 0..7. (The original study found this variant larger than
// two ordinary full adders.) Combinational.
module mv_adder2 (
  input  logic [1:0] x,
  input  logic [1:0] y,
  input  logic       ci,
  output logic [2:0] s
);
  logic [2:0] level;
  assign level = 3'(x[0]) + 3'(y[0]) + 3'(ci) + {1'b0, x[1], 1'b0} + {1'b0, y[1], 1'b0};
  mv_level_decode u_dec (.level(level), .s(s));
endmodule
