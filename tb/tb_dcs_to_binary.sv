// tb_dcs_to_binary: sum output must equal Sa + Sb + Sc for random vectors.
module tb_dcs_to_binary;
  localparam int W = 28;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [2:0][W-1:0] z;
  logic [W-1:0] sum;
  always #5 clk = ~clk;
  dcs_to_binary #(.W(W)) dut (.z(z), .sum(sum));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      if (t == 0) z = '1;
      else for (int k = 0; k < 3; k++) z[k] = W'({$urandom, $urandom});
      @(posedge clk);
      checks++;
      if (sum !== W'(z[0] + z[1] + z[2])) begin
        failures++;
        $display("FAIL %h expected %h", sum, W'(z[0] + z[1] + z[2]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
