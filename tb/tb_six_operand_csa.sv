// tb_six_operand_csa: s + c must equal the sum of six random operands.
module tb_six_operand_csa;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0][W-1:0] op;
  logic [W-1:0] s, c;
  always #5 clk = ~clk;
  six_operand_csa #(.W(W)) dut (.op(op), .s(s), .c(c));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] r;
      if (t == 0) op = '1;
      else for (int k = 0; k < 6; k++) op[k] = W'($urandom);
      @(posedge clk);
      r = '0;
      for (int k = 0; k < 6; k++) r += op[k];
      checks++;
      if (W'(s + c) !== r || c[0] !== 1'b0) begin
        failures++;
        $display("FAIL s+c=%h expected %h", W'(s + c), r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
