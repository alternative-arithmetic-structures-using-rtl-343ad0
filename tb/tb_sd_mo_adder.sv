// tb_sd_mo_adder: 8-bit six-operand adder. Applies the worked example
// 31+30+30+26+24+24 = 165, all-ones and all-zero operands, and random
// operands. For each, checks that the signed digits satisfy
// sum 2^i s_i = total with every s_i in -1..3, and that the final
// two-vector form satisfies pp - pn = total. Counts digits equal to -1 and
// 3 and fails if either never appears.
module tb_sd_mo_adder;
  import arith_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0, n_m1 = 0, n_3 = 0;
  logic clk = 0;
  logic [5:0][N-1:0] x;
  mv_digit_t s [N+2];
  logic [N+2:0] pp, pn;
  always #5 clk = ~clk;
  sd_mo_adder #(.N(N)) dut (.x(x), .s(s), .pp(pp), .pn(pn));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check;
    int total, sd, bin;
    #1;
    total = 0;
    for (int j = 0; j < 6; j++) total += int'(x[j]);
    sd = 0;
    for (int i = 0; i < N + 2; i++) begin
      sd += int'(s[i]) <<< i;
      if (s[i] < -1 || s[i] > 3) begin
        failures++;
        $display("FAIL digit %0d = %0d", i, s[i]);
      end
      if (s[i] == -1) n_m1++;
      if (s[i] == 3) n_3++;
    end
    bin = int'(pp) - int'(pn);
    checks += 2;
    if (sd != total) begin failures++; $display("FAIL digits give %0d, expected %0d", sd, total); end
    if (bin != total) begin failures++; $display("FAIL pp-pn = %0d, expected %0d", bin, total); end
  endtask

  initial begin
    x = '{8'd24, 8'd24, 8'd26, 8'd30, 8'd30, 8'd31};
    check();
    x = '1;
    check();
    x = '0;
    check();
    for (int t = 0; t < 20000; t++) begin
      for (int j = 0; j < 6; j++) x[j] = N'($urandom);
      check();
    end
    checks += 2;
    if (n_m1 == 0) begin failures++; $display("FAIL no -1 digit"); end
    if (n_3 == 0) begin failures++; $display("FAIL no 3 digit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
