// tb_mv_counter_mvout: exhaustive over the seven inputs (start point
// chosen with $urandom). Checks cout = (ones >= 4) and out = ones mod 4.
module tb_mv_counter_mvout;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [6:0] x;
  logic cout;
  logic [1:0] out;
  always #5 clk = ~clk;
  mv_counter_mvout dut (.x(x), .cout(cout), .out(out));
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int base;
    base = int'($urandom % 128);
    for (int k = 0; k < 128; k++) begin
      int n;
      x = 7'(k + base);
      #1;
      n = $countones(x);
      checks++;
      if (cout !== (n >= 4) || int'(out) != n % 4) begin
        failures++;
        $display("FAIL x=%b cout=%b out=%0d", x, cout, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
