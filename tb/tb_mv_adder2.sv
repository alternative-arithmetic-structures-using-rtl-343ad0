// tb_mv_adder2: exhaustive over x, y and ci (order rotated by $urandom).
// Checks s = x + y + ci.
module tb_mv_adder2;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [1:0] x, y;
  logic ci;
  logic [2:0] s;
  always #5 clk = ~clk;
  mv_adder2 dut (.x(x), .y(y), .ci(ci), .s(s));
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int base;
    base = int'($urandom % 32);
    for (int k = 0; k < 32; k++) begin
      {ci, x, y} = 5'(k + base);
      #1;
      checks++;
      if (int'(s) != int'(x) + int'(y) + int'(ci)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d gave %0d", x, y, ci, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
