// tb_mv_mult8x8: exhaustive over all 65536 operand pairs (starting point
// chosen with $urandom), checking p = a*b.
module tb_mv_mult8x8;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] a, b;
  logic [15:0] p;
  always #5 clk = ~clk;
  mv_mult8x8 dut (.a(a), .b(b), .p(p));
  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int base;
    base = int'($urandom % 65536);
    for (int k = 0; k < 65536; k++) begin
      {a, b} = 16'(k + base);
      #1;
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d gave %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
