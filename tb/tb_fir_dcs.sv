// tb_fir_dcs: the 25-tap filter at its default coefficients. The reference
// is a direct convolution with the integer coefficients h[k]*2^11 written
// out below. Checks the impulse response (every tap), a full-scale step,
// random samples with gaps in in_valid, and that out_valid follows in_valid
// by exactly two cycles. Also confirms the coefficient set is symmetric (so
// the shared multiply stages are used).
module tb_fir_dcs;
  localparam int N = 25, DW = 12, CW = 12, W = DW + CW;
  localparam int H [N] = '{-8, -12, -1, 23, 40, 18, -42, -102, -82, 60, 296, 522, 616,
                           522, 296, 60, -82, -102, -42, 18, 40, 23, -1, -12, -8};
  int checks = 0, failures = 0, n_gap = 0, n_out = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DW-1:0] x = '0;
  logic [W-1:0] y;
  logic out_valid;
  always #5 clk = ~clk;
  fir_dcs dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out_valid(out_valid));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [N];
  logic v1 = 0, v2 = 0;
  logic [W-1:0] e1, e2;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== v2) begin
        failures++;
        $display("FAIL out_valid=%b expected %b", out_valid, v2);
      end
      if (v2) begin
        checks++;
        n_out++;
        if (y !== e2) begin
          failures++;
          $display("FAIL y=%0d expected %0d", signed'(y), signed'(e2));
        end
      end
      v2 <= v1;
      e2 <= e1;
      v1 <= in_valid;
      if (in_valid) begin
        longint acc;
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(signed'(x));
        acc = 0;
        for (int k = 0; k < N; k++) acc += longint'(H[k]) * hist[k];
        e1 <= W'(acc);
      end else n_gap++;
    end
  end

  task automatic send(input int v);
    @(negedge clk);
    in_valid = 1;
    x = DW'(v);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      checks++;
      if (H[k] != H[N-1-k]) failures++;
      hist[k] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // impulse: outputs are the coefficients themselves
    send(1);
    for (int k = 1; k < N + 2; k++) send(0);
    // full-scale steps
    for (int k = 0; k < N + 2; k++) send(-2048);
    for (int k = 0; k < N + 2; k++) send(2047);
    // random samples, back to back and with gaps
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      x = DW'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_gap == 0 || n_out < 1000) failures++;
    $display("outputs=%0d gaps=%0d", n_out, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
