// fir_dcs: fixed-coefficient transposed-form FIR filter in double carry-save
// arithmetic.
//
//   y[n] = sum_{k=0}^{N-1} h[k] x[n-k]
//
// Each coefficient is a constant with at most six non-zero signed digits
// (the coefficient sets are designed that way), so h[k]*x is one (6,3)
// counter level (fir_tap) and adding it to the partial sum from the next tap
// is a second (6,3) level (dcs_accumulate). Partial sums travel between taps
// as DCS numbers (three W-bit vectors, W = DW + CW) in registers, so the
// critical path is two LUT levels whatever N is. After tap 0 a three-operand
// adder turns the DCS sum into binary in its own pipeline stage.
// Taps with identical coefficients at mirror positions k and N-1-k (a
// linear-phase filter) share one multiply stage.
//
// Coefficients: COEF_POS[k] / COEF_NEG[k] mark the +1 / -1 digits of the
// integer coefficient h[k]*2^(CW-1). The defaults are the 25-tap low-pass
// filter with 12-digit coefficients (passband 0.2, stopband 0.4 of the
// sampling rate, 44 dB attenuation). The output y is x convolved with those
// integers, modulo 2^W; divide by 2^(CW-1) for the real-valued response.
//
// Timing: a sample x presented with in_valid=1 at clock edge t updates all
// partial-sum registers at t; y holds the output for that sample after edge
// t+1, with out_valid=1 for one cycle. The registers advance only on
// in_valid, so samples may arrive at any rate up to one per clock.
// rst_n (asynchronous, active low) clears the filter state.
// The arithmetic and the filter follow the reference design; the handshake,
// reset and output register are this design's choices.
module fir_dcs #(
  parameter int                    N        = 25,
  parameter int                    DW       = 12,
  parameter int                    CW       = 12,
  parameter logic [N-1:0][CW-1:0]  COEF_POS = {12'h000, 12'h004, 12'h000, 12'h020, 12'h028, 12'h012, 12'h000, 12'h022, 12'h000, 12'h040, 12'h128, 12'h20a, 12'h288, 12'h20a, 12'h128, 12'h040, 12'h000, 12'h022, 12'h000, 12'h012, 12'h028, 12'h020, 12'h000, 12'h004, 12'h000},
  parameter logic [N-1:0][CW-1:0]  COEF_NEG = {12'h008, 12'h010, 12'h001, 12'h009, 12'h000, 12'h000, 12'h02a, 12'h088, 12'h052, 12'h004, 12'h000, 12'h000, 12'h020, 12'h000, 12'h000, 12'h004, 12'h052, 12'h088, 12'h02a, 12'h000, 12'h000, 12'h009, 12'h001, 12'h010, 12'h008}
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [DW-1:0]      x,
  output logic [DW+CW-1:0]   y,
  output logic               out_valid
);
  localparam int W = DW + CW;

  logic [2:0][W-1:0] prod [N];
  logic [2:0]        res  [N];
  logic [2:0][W-1:0] sum  [N];   // combinational tap outputs
  logic [2:0][W-1:0] r    [N];   // partial-sum registers
  logic              v1;
  logic [W-1:0]      bin;

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam int M = N - 1 - k;
    if (M < k && COEF_POS[k] == COEF_POS[M] && COEF_NEG[k] == COEF_NEG[M]) begin : g_shared
      assign prod[k] = prod[M];
      assign res[k]  = res[M];
    end else begin : g_mul
      fir_tap #(.DW(DW), .CW(CW), .COEF_POS(COEF_POS[k]), .COEF_NEG(COEF_NEG[k])) u_mul (
        .x(x), .p(prod[k]), .residue(res[k])
      );
    end

    if (k == N - 1) begin : g_last
      dcs_accumulate #(.W(W)) u_acc (.p(prod[k]), .acc('0), .residue(res[k]), .z(sum[k]));
    end else begin : g_mid
      dcs_accumulate #(.W(W)) u_acc (.p(prod[k]), .acc(r[k+1]), .residue(res[k]), .z(sum[k]));
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        r[k] <= '0;
      else if (in_valid) r[k] <= sum[k];
    end
  end

  dcs_to_binary #(.W(W)) u_conv (.z(r[0]), .sum(bin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (v1) y <= bin;
    end
  end
endmodule
