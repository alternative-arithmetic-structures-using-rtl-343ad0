// tb_mv_counter73: exhaustive over the seven inputs (start point chosen
// with $urandom). Checks s = number of ones; also checks the comparator
// stage alone for every level 0..7.
module tb_mv_counter73;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [6:0] x;
  logic [2:0] s, lv, ls;
  always #5 clk = ~clk;
  mv_counter73 dut (.x(x), .s(s));
  mv_level_decode dec (.level(lv), .s(ls));
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
      x = 7'(k + base);
      #1;
      checks++;
      if (int'(s) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b s=%0d", x, s);
      end
    end
    for (int l = 0; l < 8; l++) begin
      lv = 3'(l);
      #1;
      checks++;
      if (ls !== lv) begin failures++; $display("FAIL level %0d decoded %0d", l, ls); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
