// tb_mv_to_binary: all five digit values -1..3. Checks the encoding against
// the table (s: sh slp sln) -1: 0 0 1, 0: 0 0 0, 1: 0 1 0, 2: 1 0 0,
// 3: 1 1 0, i.e. s = 2*sh + slp - sln with slp and sln never both set.
// The order of the values is shuffled with $urandom.
module tb_mv_to_binary;
  import arith_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  mv_digit_t s;
  logic sh, slp, sln;
  localparam logic [2:0] TBL [5] = '{3'b001, 3'b000, 3'b010, 3'b100, 3'b110};
  always #5 clk = ~clk;
  mv_to_binary dut (.s(s), .sh(sh), .slp(slp), .sln(sln));
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int off;
    off = int'($urandom % 5);
    for (int k = 0; k < 20; k++) begin
      int v;
      v = (k + off) % 5 - 1;
      s = mv_digit_t'(v);
      #1;
      checks++;
      if ({sh, slp, sln} !== TBL[v + 1] || 2 * int'(sh) + int'(slp) - int'(sln) != v) begin
        failures++;
        $display("FAIL s=%0d sh=%b slp=%b sln=%b", v, sh, slp, sln);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
