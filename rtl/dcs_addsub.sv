// dcs_addsub: addition or subtraction of two double carry-save numbers.
//
// A DCS number is three W-bit vectors whose sum is its value (see
// dcs_reduce63). Two of them are six vectors, so one row of (6,3) counters
// adds them and the result is again DCS: an addition costs a single LUT
// level, with no carry chain at all.
// For a - b (sub = 1) the three vectors of b are inverted; completing the
// two's complement of the three needs +3, which is placed in the free low
// slots of the result: +1 at Sc bit 0 and +2 at Sc bit 1 (Sb bit 0 stays 0).
// This follows the subtraction array of the reference design; combining the
// adder and the subtractor behind one `sub` input is this design's choice.
// Arithmetic is modulo 2^W. Purely combinational.
module dcs_addsub #(
  parameter int W = 28
) (
  input  logic             sub,
  input  logic [2:0][W-1:0] a,
  input  logic [2:0][W-1:0] b,
  output logic [2:0][W-1:0] z
);
  logic [5:0][W-1:0] op;
  logic [2:0][W-1:0] r;

  assign op[0] = a[0];
  assign op[1] = a[1];
  assign op[2] = a[2];
  assign op[3] = b[0] ^ {W{sub}};
  assign op[4] = b[1] ^ {W{sub}};
  assign op[5] = b[2] ^ {W{sub}};

  dcs_reduce63 #(.W(W)) u_red (.op(op), .z(r));

  always_comb begin
    z = r;
    z[2][0] = sub;          // +1
    z[2][1] = sub;          // +2
  end
endmodule
