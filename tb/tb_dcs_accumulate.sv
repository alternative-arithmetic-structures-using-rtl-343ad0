// tb_dcs_accumulate: value(z) must equal value(p) + value(acc) + the number
// of residue ones, modulo 2^W, for random inputs and all residue patterns.
module tb_dcs_accumulate;
  localparam int W = 28;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [2:0][W-1:0] p, acc, z;
  logic [2:0] residue;
  always #5 clk = ~clk;
  dcs_accumulate #(.W(W)) dut (.p(p), .acc(acc), .residue(residue), .z(z));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] e;
      for (int k = 0; k < 3; k++) begin
        p[k]   = W'({$urandom, $urandom});
        acc[k] = W'({$urandom, $urandom});
      end
      if (t < 8) begin
        p = '1; acc = '1;
      end
      residue = 3'(t);
      @(posedge clk);
      e = p[0] + p[1] + p[2] + acc[0] + acc[1] + acc[2]
          + W'(residue[0]) + W'(residue[1]) + W'(residue[2]);
      checks++;
      if (W'(z[0] + z[1] + z[2]) !== e) begin
        failures++;
        $display("FAIL got %h expected %h", W'(z[0] + z[1] + z[2]), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
