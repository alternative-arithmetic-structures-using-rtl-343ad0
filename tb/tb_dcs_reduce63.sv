// tb_dcs_reduce63: random and corner operands; the three output vectors must
// add up to the sum of the six operands (mod 2^W), the free low slots must
// be zero and each output bit must equal the expected counter output bit.
module tb_dcs_reduce63;
  localparam int W = 28;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0][W-1:0] op;
  logic [2:0][W-1:0] z;
  always #5 clk = ~clk;
  dcs_reduce63 #(.W(W)) dut (.op(op), .z(z));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check();
    logic [W-1:0] ref_sum, got;
    ref_sum = '0;
    for (int k = 0; k < 6; k++) ref_sum += op[k];
    got = z[0] + z[1] + z[2];
    checks++;
    if (got !== ref_sum) begin
      failures++;
      $display("FAIL sum %h expected %h", got, ref_sum);
    end
    checks++;
    if (z[1][0] || z[2][0] || z[2][1]) begin
      failures++;
      $display("FAIL free slots not zero");
    end
    // column-wise: count of column i has bits z[0][i], z[1][i+1], z[2][i+2]
    for (int i = 0; i < W; i++) begin
      int n, g;
      n = 0;
      for (int k = 0; k < 6; k++) n += int'(op[k][i]);
      g = int'(z[0][i]) + ((i + 1 < W) ? 2 * int'(z[1][i+1]) : (n & 2))
          + ((i + 2 < W) ? 4 * int'(z[2][i+2]) : (n & 4));
      checks++;
      if (g != n) begin
        failures++;
        $display("FAIL column %0d count %0d got %0d", i, n, g);
      end
    end
  endtask
  initial begin
    op = '1;
    @(posedge clk); check();
    op = '0;
    @(posedge clk); check();
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 6; k++) op[k] = W'({$urandom, $urandom});
      @(posedge clk); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
