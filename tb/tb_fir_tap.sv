// tb_fir_tap: value(p) + residue ones must equal x*h modulo 2^24 for all
// 12-bit x, for a four-digit coefficient (counter path, default 616) and a
// three-digit one (direct path, -2^5 -2^3 -2^1 = -42).
module tb_fir_tap;
  localparam int DW = 12, CW = 12, W = 24;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [DW-1:0] x;
  logic [2:0][W-1:0] p4, p3;
  logic [2:0] r4, r3;
  always #5 clk = ~clk;
  fir_tap #(.DW(DW), .CW(CW)) dut (.x(x), .p(p4), .residue(r4));
  fir_tap #(.DW(DW), .CW(CW), .COEF_POS(12'h000), .COEF_NEG(12'h02a)) dut3 (
    .x(x), .p(p3), .residue(r3));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [W-1:0] value(input logic [2:0][W-1:0] p, input logic [2:0] r);
    return p[0] + p[1] + p[2] + W'(r[0]) + W'(r[1]) + W'(r[2]);
  endfunction
  initial begin
    for (int v = 0; v < 4096; v++) begin
      longint xs;
      x = DW'(v);
      @(posedge clk);
      xs = longint'(signed'(x));
      checks += 2;
      if (value(p4, r4) !== W'(xs * 616)) begin
        failures++;
        $display("FAIL x=%0d got %h expected %h", xs, value(p4, r4), W'(xs * 616));
      end
      if (value(p3, r3) !== W'(xs * -42)) begin
        failures++;
        $display("FAIL3 x=%0d got %h expected %h", xs, value(p3, r3), W'(xs * -42));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
