// fir_tap: multiply stage of one fixed-coefficient FIR tap.
//
// Produces the DCS product x*h (three W-bit vectors, W = DW + CW) plus three
// residue bits of weight 1 that the accumulation stage (dcs_accumulate) adds.
//  * Four to six non-zero coefficient digits: the aligned rows from
//    csd_ppgen go through one (6,3) counter row; the half-weight column holds
//    the paired negation bits (even count, so s0 there is always 0).
//  * Three or fewer non-zero digits: no counters at all. The (at most three)
//    shifted rows are already a DCS number; all their negation bits go to the
//    residue. This halves the hardware of such a tap.
// Both cases follow the reference design; how the negation bits are routed
// in the second case is this design's choice. Purely combinational.
module fir_tap #(
  parameter int            DW       = 12,
  parameter int            CW       = 12,
  parameter logic [CW-1:0] COEF_POS = 12'h288,
  parameter logic [CW-1:0] COEF_NEG = 12'h020
) (
  input  logic [DW-1:0]             x,
  output logic [2:0][DW+CW-1:0]     p,
  output logic [2:0]                residue
);
  localparam int W  = DW + CW;
  localparam int NZ = $countones(COEF_POS | COEF_NEG);

  logic [5:0][W:0] pp;
  logic [2:0]      res_pp;

  csd_ppgen #(.DW(DW), .CW(CW), .COEF_POS(COEF_POS), .COEF_NEG(COEF_NEG)) u_pp (
    .x(x), .pp(pp), .residue(res_pp)
  );

  if (NZ > 3) begin : g_reduce
    logic [2:0][W:0] zz;
    dcs_reduce63 #(.W(W + 1)) u_red (.op(pp), .z(zz));
    assign p[0]    = zz[0][W:1];
    assign p[1]    = zz[1][W:1];
    assign p[2]    = zz[2][W:1];
    assign residue = res_pp;
    always_comb begin
      assert (zz[0][0] == 1'b0) else $error("fir_tap: odd half-weight column");
    end
  end else begin : g_direct
    assign p[0]    = pp[0][W:1];
    assign p[1]    = pp[1][W:1];
    assign p[2]    = pp[2][W:1];
    // negation bits of digits 0,1,2 as paired by csd_ppgen
    assign residue = {pp[4][0], pp[2][0], pp[0][0]};
  end
endmodule
