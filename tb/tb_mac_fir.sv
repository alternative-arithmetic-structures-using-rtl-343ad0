// tb_mac_fir: 15-tap filter on four MAC units (one sample per four clocks).
// Loads random coefficients, streams random samples (with gaps, and
// back-to-back at full rate), reloads a new coefficient set mid-stream, and
// compares every output with a direct convolution modulo 2^28. Checks that
// each output is set at the (P+3)-th edge after the edge that accepted its
// sample (so it is seen at the (P+4)-th), that
// in_ready allows exactly one sample per P = ceil(15/4) = 4 clocks at full
// rate, and counts stalls (in_valid while not ready).
module tb_mac_fir;
  localparam int N = 15, M = 4, DW = 12, CW = 12, W = 28;
  localparam int P = (N + M - 1) / M;
  int checks = 0, failures = 0, n_stall = 0, n_out = 0, n_b2b = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [DW-1:0] x = '0;
  logic coef_we = 0;
  logic [$clog2(N)-1:0] coef_addr = '0;
  logic [CW-1:0] coef_data = '0;
  logic [W-1:0] y;
  logic out_valid;
  always #5 clk = ~clk;
  mac_fir #(.N(N), .M(M), .DW(DW), .CW(CW), .W(W)) dut (.*);
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [N];       // coefficients seen by the filter (updated at write)
  int hist [N];
  int cyc = 0;
  int exp_t [$];
  logic [W-1:0] exp_y [$];
  int last_acc = -100;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (out_valid) begin
        checks += 2;
        n_out++;
        if (exp_y.size() == 0) begin
          failures++;
          $display("FAIL unexpected output");
        end else begin
          int t;
          logic [W-1:0] e;
          t = exp_t.pop_front();
          e = exp_y.pop_front();
          if (y !== e) begin failures++; $display("FAIL y=%h expected %h", y, e); end
          if (cyc - t != P + 4) begin failures++; $display("FAIL latency %0d", cyc - t); end
        end
      end
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        longint acc;
        if (cyc - last_acc == P) n_b2b++;
        checks++;
        if (cyc - last_acc < P) begin failures++; $display("FAIL samples %0d clocks apart", cyc - last_acc); end
        last_acc = cyc;
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(signed'(x));
        acc = 0;
        for (int k = 0; k < N; k++) acc += longint'(h[k]) * hist[k];
        exp_t.push_back(cyc);
        exp_y.push_back(W'(acc));
      end
    end
  end

  task automatic load_coefs;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we = 1;
      coef_addr = 4'(k);
      coef_data = CW'($urandom);
      h[k] = int'(signed'(coef_data));
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  task automatic stream(input int n, input bit full_rate);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = full_rate || ($urandom % 3 == 0);
      x = DW'($urandom);
      if (in_valid) begin
        // hold the sample until it is taken
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        in_valid = 0;
        if (!full_rate) repeat ($urandom % 3) @(negedge clk);
      end
    end
  endtask

  initial begin
    foreach (h[k]) h[k] = 0;
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    load_coefs();
    stream(200, 0);
    stream(200, 1);
    // wait until idle, then change the coefficients
    @(negedge clk);
    in_valid = 0;
    repeat (P + 4) @(negedge clk);
    load_coefs();
    stream(200, 1);
    @(negedge clk);
    in_valid = 0;
    repeat (P + 6) @(posedge clk);
    checks += 4;
    if (exp_y.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_y.size()); end
    if (n_out < 400) begin failures++; $display("FAIL only %0d outputs", n_out); end
    if (n_stall == 0) begin failures++; $display("FAIL never stalled"); end
    if (n_b2b == 0) begin failures++; $display("FAIL never at full rate"); end
    $display("outputs=%0d stalls=%0d full_rate=%0d", n_out, n_stall, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
