// tb_sd_digit_slice: exhaustive over the six input bits and the incoming
// carry. Checks 4*cout + s = ones(x) + cin, that cout is the count >= 3
// decision, and that s stays in -1..3. Every digit value must occur.
module tb_sd_digit_slice;
  import arith_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0] x;
  logic cin, cout;
  mv_digit_t s;
  int seen [5];
  always #5 clk = ~clk;
  sd_digit_slice dut (.x(x), .cin(cin), .cout(cout), .s(s));
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int base;
    base = int'($urandom % 64);
    foreach (seen[i]) seen[i] = 0;
    for (int k = 0; k < 128; k++) begin
      int n;
      {cin, x} = 7'((k + base) % 128);
      #1;
      n = $countones(x);
      checks++;
      if (4 * int'(cout) + int'(s) != n + int'(cin) || cout != (n >= 3) || s < -1 || s > 3) begin
        failures++;
        $display("FAIL x=%b cin=%b cout=%b s=%0d", x, cin, cout, s);
      end else seen[s + 1]++;
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL digit %0d never produced", i - 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
