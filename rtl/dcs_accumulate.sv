// dcs_accumulate: accumulation stage of the DCS multiply-add.
//
// Adds a DCS product p, a DCS partial sum acc and three residue bits of
// weight 1 (the negation bits left over from the partial-product generator)
// in one row of (6,3) counters; the result is DCS again. p and acc fill the
// six inputs of every real column. The residue bits go into an extra
// half-weight column below bit 0, each one twice (two halves make a unit);
// that column's count is even, so its s0 output is always 0 and is dropped,
// while its s1 and s2 land in the free slots Sb[0] and Sc[1] of the result.
// The reference design states only that the residue is absorbed at the
// accumulation step; the half-column placement is this design's choice.
// Modulo 2^W, purely combinational, one counter delay.
module dcs_accumulate #(
  parameter int W = 28
) (
  input  logic [2:0][W-1:0] p,
  input  logic [2:0][W-1:0] acc,
  input  logic [2:0]        residue,
  output logic [2:0][W-1:0] z
);
  logic [5:0][W:0] op;
  logic [2:0][W:0] zz;

  assign op[0] = {p[0],   residue[0]};
  assign op[1] = {p[1],   residue[0]};
  assign op[2] = {p[2],   residue[1]};
  assign op[3] = {acc[0], residue[1]};
  assign op[4] = {acc[1], residue[2]};
  assign op[5] = {acc[2], residue[2]};

  dcs_reduce63 #(.W(W + 1)) u_red (.op(op), .z(zz));

  assign z[0] = zz[0][W:1];
  assign z[1] = zz[1][W:1];
  assign z[2] = zz[2][W:1];

  // the half-weight column holds pairs only, so its s0 output must be 0
  always_comb begin
    assert (zz[0][0] == 1'b0) else $error("dcs_accumulate: odd half-weight column");
  end
endmodule
