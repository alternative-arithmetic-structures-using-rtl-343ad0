// dcs_reduce63: W-digit array of (6,3) counters.
//
// Reduces six W-bit binary operands to one double carry-save (DCS) number in
// a single counter level. The counter of column i adds bit i of the six
// operands; its outputs s0, s1, s2 have weights 2^i, 2^(i+1), 2^(i+2). The DCS
// result is kept as three W-bit vectors
//   z[0] = Sa = S0,  z[1] = Sb = S1 << 1,  z[2] = Sc = S2 << 2,
// whose sum is the sum of the six operands modulo 2^W. Every digit of a DCS
// number therefore has three bits and a value 0..3. Outputs of the top two
// columns that would land at weight 2^W and above are dropped; the free
// slots z[1][0], z[2][0] and z[2][1] are 0 (callers may fill them).
// Purely combinational, one counter delay.
module dcs_reduce63 #(
  parameter int W = 28
) (
  input  logic [5:0][W-1:0] op,
  output logic [2:0][W-1:0] z
);
  logic [W-1:0][2:0] cnt;

  for (genvar i = 0; i < W; i++) begin : g_col
    counter63 u_cnt (
      .x({op[5][i], op[4][i], op[3][i], op[2][i], op[1][i], op[0][i]}),
      .s(cnt[i])
    );
    assign z[0][i] = cnt[i][0];
    if (i >= 1) begin : g_b
      assign z[1][i] = cnt[i-1][1];
    end else begin : g_b0
      assign z[1][i] = 1'b0;
    end
    if (i >= 2) begin : g_c
      assign z[2][i] = cnt[i-2][2];
    end else begin : g_c0
      assign z[2][i] = 1'b0;
    end
  end
endmodule
