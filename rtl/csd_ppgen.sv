// csd_ppgen: partial products of a fixed-coefficient multiplication.
//
// The coefficient is a constant in canonic signed-digit form with at most six
// non-zero digits, given as two masks: bit i of COEF_POS means +2^i and bit i
// of COEF_NEG means -2^i of the integer coefficient (coefficient value h
// times 2^(CW-1)). For each non-zero digit, taken from the least significant
// up, the sample x (DW-bit two's complement) is sign-extended to
// W = DW + CW bits and shifted left by the digit position; for a negative
// digit the whole shifted word is complemented, which leaves ones in the low
// bits, so every negation needs +1 at weight 1.
// Output rows are W+1 bits with an extra half-weight column at bit 0: the
// negation bits of digits 0,1,2 go there twice each (rows 0/1, 2/3, 4/5)
// and those of digits 3,4,5 leave as `residue` for the accumulation stage.
// Unused rows are zero. No logic is generated beyond inverters: this is only
// wiring of x, ~x and constant sign bits.
// The scheme (shift, complement, sign padding, paired sign bits, residue)
// follows the reference design. Purely combinational.
module csd_ppgen #(
  parameter int              DW       = 12,
  parameter int              CW       = 12,
  parameter logic [CW-1:0]   COEF_POS = 12'h288,
  parameter logic [CW-1:0]   COEF_NEG = 12'h020
) (
  input  logic [DW-1:0]            x,
  output logic [5:0][DW+CW:0]      pp,
  output logic [2:0]               residue
);
  localparam int W = DW + CW;

  // bit position of the k-th non-zero digit, -1 if there is none
  function automatic int digit_pos(input int k);
    int n;
    n = 0;
    for (int i = 0; i < CW; i++) begin
      if (COEF_POS[i] || COEF_NEG[i]) begin
        if (n == k) return i;
        n++;
      end
    end
    return -1;
  endfunction

  function automatic int digit_count();
    int n;
    n = 0;
    for (int i = 0; i < CW; i++) if (COEF_POS[i] || COEF_NEG[i]) n++;
    return n;
  endfunction

  if (digit_count() > 6 || (COEF_POS & COEF_NEG) != '0) begin : g_bad
    $error("csd_ppgen: at most six non-zero digits, and no digit both + and -");
  end

  logic [5:0] neg;

  for (genvar k = 0; k < 6; k++) begin : g_row
    localparam int POS = digit_pos(k);
    if (POS >= 0) begin : g_used
      logic [W-1:0] row;
      assign neg[k] = COEF_NEG[POS];
      always_comb begin
        row = W'(signed'(x)) << POS;
        if (neg[k]) row = ~row;
      end
      assign pp[k][W:1] = row;
    end else begin : g_unused
      assign neg[k]     = 1'b0;
      assign pp[k][W:1] = '0;
    end
  end

  assign pp[0][0] = neg[0];
  assign pp[1][0] = neg[0];
  assign pp[2][0] = neg[1];
  assign pp[3][0] = neg[1];
  assign pp[4][0] = neg[2];
  assign pp[5][0] = neg[2];
  assign residue  = {neg[5], neg[4], neg[3]};
endmodule
