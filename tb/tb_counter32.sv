// tb_counter32: exhaustive check of the full adder: x+y+z == 2c+s.
module tb_counter32;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic x, y, z, s, c;
  always #5 clk = ~clk;
  counter32 dut (.x(x), .y(y), .z(z), .s(s), .c(c));
  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      @(posedge clk);
      checks++;
      if (2 * int'(c) + int'(s) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("FAIL %b%b%b -> c=%b s=%b", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
