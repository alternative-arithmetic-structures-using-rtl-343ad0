// booth_ppgen: radix-4 (modified) Booth partial-product generator.
//
// Multiplies the two's complement multiplicand a (MW bits) by the two's
// complement multiplier b (NW bits, even, at most 12). b is recoded into
// NW/2 digits m_i = -2 b[2i+1] + b[2i] + b[2i-1] in {-2,-1,0,1,2}
// (b[-1] = 0); each digit selects 0, +-a or +-2a for row i, which has weight
// 4^i. A negative row is formed as the bitwise complement of the whole
// shifted row, so it needs +1 at weight 1 (the row's negation bit).
//
// Output format (all rows W+1 bits wide, sign-extended over W):
//   pp[k][W:1]  row k, shifted by 2k, in W bits (modulo 2^W)
//   pp[k][0]    an extra half-weight column. The negation bits of rows 0,1,2
//               are placed there twice each (rows 0/1 carry neg0, rows 2/3
//               neg1, rows 4/5 neg2): two halves make a unit, and the column
//               sum is even, so a (6,3) counter on it never produces an s0.
//   residue     negation bits of rows 3,4,5 (weight 1), added at the
//               accumulation stage.
// So  sum_k pp[k] / 2 + residue-ones == a*b  (mod 2^W), and six rows feed one
// (6,3) counter level with no seventh row, which is the point of the
// back-extension of the sign bits.
// The selection table (0, a_j, a_j, a_(j-1), ~a_(j-1), ~a_j, ~a_j, 0 for
// b[2i+1:2i-1] = 000..111) and the 12x12 size with 28-bit results follow the
// reference design. Full sign extension of each row (instead of a
// constant-ones sign-extension pattern) and a zero row with sign 0 for the
// digits 000 and 111 are this design's choices; both give the same value.
// Purely combinational.
module booth_ppgen #(
  parameter int MW = 12,
  parameter int NW = 12,
  parameter int W  = 28
) (
  input  logic [MW-1:0]      a,
  input  logic [NW-1:0]      b,
  output logic [5:0][W:0]    pp,
  output logic [2:0]         residue
);
  localparam int NR = NW / 2;

  if (NR > 6 || (NW % 2) != 0) begin : g_bad
    $error("booth_ppgen: NW must be even and at most 12");
  end

  logic [5:0] neg;

  for (genvar i = 0; i < 6; i++) begin : g_row
    if (i < NR) begin : g_used
      logic       bh, bm, bl;       // b[2i+1], b[2i], b[2i-1]
      logic       one, two;
      logic [MW:0] sel;             // |m_i| * a, MW+1 bits, signed
      logic [W-1:0] row;

      assign bh = b[2*i+1];
      assign bm = b[2*i];
      if (i == 0) begin : g_b0
        assign bl = 1'b0;
      end else begin : g_bn
        assign bl = b[2*i-1];
      end

      assign one    = bm ^ bl;
      assign two    = (bh & ~bm & ~bl) | (~bh & bm & bl);
      assign neg[i] = bh & ~(bm & bl);

      always_comb begin
        if (one)      sel = {a[MW-1], a};
        else if (two) sel = {a, 1'b0};
        else          sel = '0;
        // sign-extend to W bits, shift to weight 4^i, complement if negative
        row = W'(signed'(sel)) << (2 * i);
        if (neg[i]) row = ~row;
      end

      assign pp[i][W:1] = row;
    end else begin : g_unused
      assign neg[i]     = 1'b0;
      assign pp[i][W:1] = '0;
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
