// tb_counter63: exhaustive check of the (6,3) counter against a bit count.
module tb_counter63;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0] x;
  logic [2:0] s;
  always #5 clk = ~clk;
  counter63 dut (.x(x), .s(s));
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 64; v++) begin
      int n;
      x = 6'(v);
      n = 0;
      for (int i = 0; i < 6; i++) n += (v >> i) & 1;
      @(posedge clk);
      checks++;
      if (int'(s) != n) begin
        failures++;
        $display("FAIL x=%b s=%0d expected %0d", x, s, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
