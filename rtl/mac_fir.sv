// mac_fir: variable-coefficient FIR filter computed on M DCS MAC units.
//
// y(n) = sum_{k=0}^{N-1} h_k x(n-k) for 12-bit samples and 12-bit
// coefficients. The N taps are split into M groups of P = ceil(N/M) taps;
// MAC unit j (mac_dcs) handles taps j*P .. j*P+P-1 and needs P clocks per
// output sample, so the filter accepts one sample every P clocks
// (sampling rate f_clk / ceil(N/M)). The M partial sums leave the MACs in
// binary and are added by one plain adder into the registered output.
//
// Operation:
//   * A sample is accepted on a clock edge with in_valid && in_ready; it is
//     shifted into the N-entry sample history x_hist[0] = x(n).
//   * The P clocks that follow issue tap p of every group to its MAC
//     (clear on p = 0, so each output starts a fresh sum). in_ready is high
//     when idle and in the last of the P issue cycles, so back-to-back
//     samples keep all MACs busy every clock.
//   * Coefficients sit in a register file written through coef_we /
//     coef_addr / coef_data (tap index k holds h_k); they may be changed at
//     any time and take effect from the next issue cycle.
// Timing: a sample accepted at edge a gives y with out_valid after edge
// a+P+3 (P issue cycles, then the MAC's accumulator and result registers
// and the output adder register). Arithmetic wraps modulo 2^W. Reset is
// asynchronous, active low.
// The throughput formula and the default sizes (15 taps on 4 MAC units,
// the example worked out for this configuration) follow the reference
// design; the tap-to-MAC assignment, the sample history, the coefficient
// register file, the handshake and the final adder are this design's
// choices, since the original gives only the throughput.
module mac_fir #(
  parameter int N  = 15,
  parameter int M  = 4,
  parameter int DW = 12,
  parameter int CW = 12,
  parameter int W  = 28
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [DW-1:0]        x,
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  logic [CW-1:0]        coef_data,
  output logic [W-1:0]         y,
  output logic                 out_valid
);
  localparam int P  = (N + M - 1) / M;
  localparam int PB = (P > 1) ? $clog2(P) : 1;

  logic [N-1:0][DW-1:0] x_hist;
  logic [N-1:0][CW-1:0] coef;
  logic                 busy;
  logic [PB-1:0]        p;
  logic                 accept, last;
  logic [2:0]           last_d;

  assign last     = busy && (p == PB'(P - 1));
  assign in_ready = !busy || last;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_hist <= '0;
      busy   <= 1'b0;
      p      <= '0;
    end else begin
      if (accept) begin
        x_hist <= {x_hist[N-2:0], x};
        busy   <= 1'b1;
        p      <= '0;
      end else if (last) begin
        busy   <= 1'b0;
      end else if (busy) begin
        p      <= p + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coef <= '0;
    else if (coef_we && int'(coef_addr) < N) coef[coef_addr] <= coef_data;
  end

  // M MAC units, unit j on taps j*P + p
  logic [M-1:0][W-1:0] part;
  logic [M-1:0]        part_v;
  for (genvar j = 0; j < M; j++) begin : g_mac
    logic [DW-1:0]       a_j;
    logic [CW-1:0]       b_j;
    logic [2:0][W-1:0]   acc_unused;
    always_comb begin
      a_j = '0;
      b_j = '0;
      for (int q = 0; q < P; q++) begin
        if (int'(p) == q && j * P + q < N) begin
          a_j = x_hist[j*P+q];
          b_j = coef[j*P+q];
        end
      end
    end
    mac_dcs #(.MW(DW), .NW(CW), .W(W)) u_mac (
      .clk(clk), .rst_n(rst_n), .in_valid(busy), .clear(p == '0),
      .a(a_j), .b(b_j), .acc_dcs(acc_unused), .result(part[j]),
      .result_valid(part_v[j])
    );
  end

  // the last issue cycle's flag travels with the MAC pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_d <= '0;
    else        last_d <= {last_d[1:0], last};
  end

  logic [W-1:0] total;
  always_comb begin
    total = '0;
    for (int j = 0; j < M; j++) total += part[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= last_d[2] && (&part_v);
      if (last_d[2] && (&part_v)) y <= total;
    end
  end
endmodule
