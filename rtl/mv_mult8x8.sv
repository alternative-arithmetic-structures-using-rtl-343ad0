// mv_mult8x8: 8 x 8 unsigned multiplier using multi-valued (7,3) counters.
//
// Steps:
//  1. 64 AND partial products; column c (weight 2^c) holds min(c+1, 15-c)
//     bits, column 7 has eight.
//  2. (2,2) reduction: a half adder in column 7 and one in column 8 (which
//     receives column 7's carry) bring every column to seven bits or fewer.
//  3. One mv_counter73 per column (unused inputs 0) reduces each column to
//     s0, s1, s2; column c then holds its own s0, s1 of column c-1 and s2 of
//     column c-2: three rows.
//  4. One row of (3,2) counters reduces three rows to two.
//  5. A ripple-carry adder of full adders gives the 16-bit product.
// The step sequence follows the reference design. Which columns get a half
// adder and putting a counter on every column (the reference uses eight
// counters) are this design's choices; counters on short columns have
// constant-zero inputs and shrink in synthesis. Combinational.
module mv_mult8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  // column bits after step 1 (index = row of the partial product)
  logic [7:0] col [16];
  logic [6:0] red [16];           // columns after step 2, at most 7 bits
  logic       ha7s, ha7c, ha8s, ha8c;
  logic [2:0] cnt [16];
  logic [15:0] r0, r1, r2, fs, fc, cr;

  always_comb begin
    for (int c = 0; c < 16; c++) col[c] = '0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        col[i+j][i] = a[j] & b[i];
  end

  // step 2: half adders on two bits of columns 7 and 8
  assign ha7s = col[7][6] ^ col[7][7];
  assign ha7c = col[7][6] & col[7][7];
  assign ha8s = col[8][6] ^ col[8][7];
  assign ha8c = col[8][6] & col[8][7];

  always_comb begin
    for (int c = 0; c < 16; c++) begin
      if (c < 7) red[c] = col[c][6:0];      // rows 0..c
      else       red[c] = col[c][7:1];      // rows c-7..7, row 0 absent
    end
    red[7] = {ha7s, col[7][5:0]};
    red[8] = {ha8s, col[8][5:1], ha7c};
    red[9] = {col[9][7:2], ha8c};
  end

  // step 3: (7,3) counters
  for (genvar c = 0; c < 16; c++) begin : g_cnt
    mv_counter73 u_c73 (.x(red[c]), .s(cnt[c]));
    assign r0[c] = cnt[c][0];
    if (c >= 1) begin : g_r1
      assign r1[c] = cnt[c-1][1];
    end else begin : g_r1z
      assign r1[c] = 1'b0;
    end
    if (c >= 2) begin : g_r2
      assign r2[c] = cnt[c-2][2];
    end else begin : g_r2z
      assign r2[c] = 1'b0;
    end
  end

  // step 4: (3,2) row; step 5: ripple-carry adder
  for (genvar c = 0; c < 16; c++) begin : g_fa
    counter32 u_fa (.x(r0[c]), .y(r1[c]), .z(r2[c]), .s(fs[c]), .c(fc[c]));
  end

  for (genvar c = 0; c < 16; c++) begin : g_rca
    logic ci;
    if (c == 0) begin : g_ci0
      assign ci = 1'b0;
    end else begin : g_cin
      assign ci = cr[c-1];
    end
    if (c == 0) begin : g_b0
      counter32 u_add (.x(fs[c]), .y(1'b0), .z(ci), .s(p[c]), .c(cr[c]));
    end else begin : g_bn
      counter32 u_add (.x(fs[c]), .y(fc[c-1]), .z(ci), .s(p[c]), .c(cr[c]));
    end
  end
endmodule
