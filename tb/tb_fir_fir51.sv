// tb_fir_fir51: the 51-tap low-pass filter with 16-bit coefficients, built
// from the same fir_dcs module by overriding N, CW and the digit masks
// (12-bit samples, 28-bit output). COEF_POS/COEF_NEG hold the
// signed-digit form of the integer coefficients H below (h[k]*2^15), with at
// most four nonzero digits per coefficient; the test checks first that the
// masks encode exactly H, then runs an impulse, full-scale steps and random
// samples with gaps against a direct convolution, and checks that out_valid
// follows in_valid by two cycles.
module tb_fir_fir51;
  localparam int N = 51, DW = 12, CW = 16, W = DW + CW;
  localparam logic [N-1:0][CW-1:0] POS = {16'h0015, 16'h0000, 16'h0020, 16'h0004, 16'h0008, 16'h0081, 16'h0100, 16'h0100,
    16'h0051, 16'h0008, 16'h0090, 16'h0081, 16'h0040, 16'h0010, 16'h0280, 16'h0409,
    16'h0200, 16'h0001, 16'h0000, 16'h0210, 16'h0050, 16'h0100, 16'h0a10, 16'h1411,
    16'h2000, 16'h2010, 16'h2000, 16'h1411, 16'h0a10, 16'h0100, 16'h0050, 16'h0210,
    16'h0000, 16'h0001, 16'h0200, 16'h0409, 16'h0280, 16'h0010, 16'h0040, 16'h0081,
    16'h0090, 16'h0008, 16'h0051, 16'h0100, 16'h0100, 16'h0081, 16'h0008, 16'h0004,
    16'h0020, 16'h0000, 16'h0015};
  localparam logic [N-1:0][CW-1:0] NEG = {16'h0040, 16'h0050, 16'h0085, 16'h0051, 16'h0000, 16'h0000, 16'h0020, 16'h0024,
    16'h0000, 16'h00a2, 16'h0200, 16'h0220, 16'h0110, 16'h0144, 16'h0012, 16'h0100,
    16'h0024, 16'h0100, 16'h0454, 16'h0840, 16'h0500, 16'h0000, 16'h0000, 16'h0000,
    16'h0421, 16'h0140, 16'h0421, 16'h0000, 16'h0000, 16'h0000, 16'h0500, 16'h0840,
    16'h0454, 16'h0100, 16'h0024, 16'h0100, 16'h0012, 16'h0144, 16'h0110, 16'h0220,
    16'h0200, 16'h00a2, 16'h0000, 16'h0024, 16'h0020, 16'h0000, 16'h0000, 16'h0051,
    16'h0085, 16'h0050, 16'h0040};
  localparam int H [N] = '{-43, -80, -101, -77, 8, 129, 224, 220,
    81, -154, -368, -415, -208, -308, 622, 777,
    476, -255, -1108, -1584, -1200, 256, 2576, 5137,
    7135, 7888, 7135, 5137, 2576, 256, -1200, -1584,
    -1108, -255, 476, 777, 622, -308, -208, -415,
    -368, -154, 81, 220, 224, 129, 8, -77,
    -101, -80, -43};
  int checks = 0, failures = 0, n_gap = 0, n_out = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DW-1:0] x = '0;
  logic [W-1:0] y;
  logic out_valid;
  always #5 clk = ~clk;
  fir_dcs #(.N(N), .DW(DW), .CW(CW), .COEF_POS(POS), .COEF_NEG(NEG)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .out_valid(out_valid));
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
      int v, nd;
      v = 0;
      nd = 0;
      for (int i = 0; i < CW; i++) begin
        if (POS[k][i]) begin v += 1 << i; nd++; end
        if (NEG[k][i]) begin v -= 1 << i; nd++; end
      end
      checks++;
      if (v != H[k] || nd > 4 || (POS[k] & NEG[k]) != 0 || H[k] != H[N-1-k]) begin
        failures++;
        $display("FAIL coefficient %0d: masks give %0d, expected %0d", k, v, H[k]);
      end
      hist[k] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    send(1);
    for (int k = 1; k < N + 2; k++) send(0);
    for (int k = 0; k < N + 2; k++) send(-2048);
    for (int k = 0; k < N + 2; k++) send(2047);
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
