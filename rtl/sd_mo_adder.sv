// sd_mo_adder: six-operand adder with multi-valued signed-digit output.
//
// Adds six N-bit unsigned binary numbers without any carry propagation.
// A row of N+2 digit slices (sd_digit_slice) gives digits s_i in {-1..3}
// with S = sum_i 2^i s_i; each slice passes its carry two positions up.
// Each digit is then converted (mv_to_binary) into sh_i, slp_i, sln_i with
// s_i = 2 sh_i + slp_i - sln_i, and one row of full adders, again without
// carry propagation, adds the binary number {sh} (weight doubled) to the
// signed-digit number {slp - sln}:
//   full adder i adds sh_(i-1), slp_i and ~sln_i, giving sum_i and carry_i,
//   p_i = carry_(i-1) - (1 - sum_i)   in {-1, 0, 1},
// so S = sum_i 2^i (pp_i - pn_i) with pp_i = carry_(i-1), pn_i = ~sum_i.
// Positions run to N+2; the carry out of the top full adder is always 0
// because the top digit is at most 1.
// The digit arithmetic, the comparator equations and the use of one full
// adder row follow the reference design; the exact full-adder wiring is this
// design's choice. Delay does not depend on N. Combinational.
module sd_mo_adder
  import arith_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [5:0][N-1:0] x,
  output mv_digit_t         s  [N+2],
  output logic [N+2:0]      pp,
  output logic [N+2:0]      pn
);
  logic [N+1:0] cy;
  logic [N+1:0] sh, slp, sln;
  logic [N+2:0] fs, fc;

  for (genvar i = 0; i < N + 2; i++) begin : g_dig
    logic [5:0] col;
    logic       ci;
    if (i < N) begin : g_in
      assign col = {x[5][i], x[4][i], x[3][i], x[2][i], x[1][i], x[0][i]};
    end else begin : g_top
      assign col = '0;
    end
    if (i >= 2) begin : g_c
      assign ci = cy[i-2];
    end else begin : g_c0
      assign ci = 1'b0;
    end
    sd_digit_slice u_slice (.x(col), .cin(ci), .cout(cy[i]), .s(s[i]));
    mv_to_binary   u_conv  (.s(s[i]), .sh(sh[i]), .slp(slp[i]), .sln(sln[i]));
  end

  for (genvar i = 0; i < N + 3; i++) begin : g_fa
    logic fx, fy, fz;
    if (i >= 1) begin : g_h
      assign fx = sh[i-1];
    end else begin : g_h0
      assign fx = 1'b0;
    end
    if (i <= N + 1) begin : g_l
      assign fy = slp[i];
      assign fz = ~sln[i];
    end else begin : g_l0
      assign fy = 1'b0;
      assign fz = 1'b1;
    end
    counter32 u_fa (.x(fx), .y(fy), .z(fz), .s(fs[i]), .c(fc[i]));
    assign pn[i] = ~fs[i];
    if (i >= 1) begin : g_p
      assign pp[i] = fc[i-1];
    end else begin : g_p0
      assign pp[i] = 1'b0;
    end
  end

  always_comb begin
    assert (fc[N+2] == 1'b0) else $error("sd_mo_adder: carry out of the top position");
  end
endmodule
