// tb_dcs_addsub: random DCS operands; value(z) must be value(a) +- value(b)
// modulo 2^W, and chains of additions and subtractions must keep matching a
// running integer model.
module tb_dcs_addsub;
  localparam int W = 28;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;
  logic clk = 0;
  logic sub;
  logic [2:0][W-1:0] a, b, z;
  always #5 clk = ~clk;
  dcs_addsub #(.W(W)) dut (.sub(sub), .a(a), .b(b), .z(z));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [W-1:0] val(input logic [2:0][W-1:0] v);
    return v[0] + v[1] + v[2];
  endfunction
  initial begin
    logic [W-1:0] expect_v, run;
    for (int t = 0; t < 1000; t++) begin
      for (int k = 0; k < 3; k++) begin
        a[k] = W'({$urandom, $urandom});
        b[k] = W'({$urandom, $urandom});
      end
      sub = 1'($urandom);
      @(posedge clk);
      expect_v = sub ? val(a) - val(b) : val(a) + val(b);
      checks++;
      if (sub) n_sub++; else n_add++;
      if (val(z) !== expect_v) begin
        failures++;
        $display("FAIL sub=%b got %h expected %h", sub, val(z), expect_v);
      end
    end
    // chained use: result fed back as operand a
    a = '0;
    run = '0;
    for (int t = 0; t < 200; t++) begin
      b = '0;
      b[0] = W'({$urandom, $urandom});
      sub = 1'($urandom);
      @(posedge clk);
      run = sub ? run - b[0] : run + b[0];
      checks++;
      if (val(z) !== run) begin
        failures++;
        $display("FAIL chain %0d got %h expected %h", t, val(z), run);
      end
      a = z;
    end
    checks++;
    if (n_add == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
