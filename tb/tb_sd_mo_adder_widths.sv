// tb_sd_mo_adder_widths: the six-operand signed-digit adder at operand
// widths 8, 16, 32 and 64 bits, side by side. For each width: all-ones
// operands, then random operands; checks that sum 2^i s_i and pp - pn both
// equal the sum of the six operands (computed on N+4 bits) and that every
// digit lies in -1..3. Shows that the digit row and the full-adder row work
// unchanged at every width, since nothing propagates along the word.
module tb_sd_mo_adder_widths;
  import arith_pkg::*;
  localparam int NS [4] = '{8, 16, 32, 64};
  int checks = 0, failures = 0;
  logic [3:0] done = '0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 4; g++) begin : g_w
    localparam int N = NS[g];
    logic [5:0][N-1:0] x;
    mv_digit_t s [N+2];
    logic [N+2:0] pp, pn;
    sd_mo_adder #(.N(N)) dut (.x(x), .s(s), .pp(pp), .pn(pn));
    initial begin
      logic [N+3:0] tot, sd, bin;
      for (int t = 0; t < 3000; t++) begin
        for (int j = 0; j < 6; j++)
          for (int b = 0; b < N; b++) x[j][b] = (t == 0) ? 1'b1 : 1'($urandom);
        #1;
        tot = '0;
        for (int j = 0; j < 6; j++) tot += (N+4)'(x[j]);
        sd = '0;
        for (int i = 0; i < N + 2; i++) begin
          sd += (N+4)'(s[i]) << i;
          if (s[i] < -1 || s[i] > 3) begin
            failures++;
            $display("FAIL N=%0d digit %0d = %0d", N, i, s[i]);
          end
        end
        bin = (N+4)'(pp) - (N+4)'(pn);
        checks += 2;
        if (sd !== tot) begin failures++; $display("FAIL N=%0d digits give %h, expected %h", N, sd, tot); end
        if (bin !== tot) begin failures++; $display("FAIL N=%0d pp-pn = %h, expected %h", N, bin, tot); end
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
