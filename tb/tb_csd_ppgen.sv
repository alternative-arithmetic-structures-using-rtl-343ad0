// tb_csd_ppgen: for the default coefficient (+2^9 +2^7 -2^5 +2^3, i.e. 616)
// the rows (bit 0 as one half) plus residue ones must equal x*616 modulo
// 2^24 for every 12-bit x. A second instance with six digits
// (+2^10 -2^8 +2^6 -2^4 +2^2 -2^0) exercises the residue, and a third
// one uses the six-digit example coefficient 0-1010101 0-10-1 of the
// reference design (-2^10 +2^8 +2^6 +2^4 -2^2 -2^0 = -693), whose top digit
// is negative. Every half-weight column sum must be even.
module tb_csd_ppgen;
  localparam int DW = 12, CW = 12, W = 24;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [DW-1:0] x;
  logic [5:0][W:0] pp_a, pp_b, pp_c;
  logic [2:0] res_a, res_b, res_c;
  always #5 clk = ~clk;
  csd_ppgen #(.DW(DW), .CW(CW)) dut (.x(x), .pp(pp_a), .residue(res_a));
  csd_ppgen #(.DW(DW), .CW(CW), .COEF_POS(12'h444), .COEF_NEG(12'h111)) dut6 (
    .x(x), .pp(pp_b), .residue(res_b));
  csd_ppgen #(.DW(DW), .CW(CW), .COEF_POS(12'h150), .COEF_NEG(12'h405)) dutx (
    .x(x), .pp(pp_c), .residue(res_c));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [W-1:0] value(input logic [5:0][W:0] pp, input logic [2:0] r);
    logic [W+1:0] tot;
    tot = '0;
    for (int k = 0; k < 6; k++) tot += (W+2)'(pp[k]);
    if (tot[0]) return ~(W'(0));  // odd half column: flag as wrong
    return tot[W:1] + W'(r[0]) + W'(r[1]) + W'(r[2]);
  endfunction
  initial begin
    for (int v = 0; v < 4096; v++) begin
      longint xs;
      x = DW'(v);
      @(posedge clk);
      xs = longint'(signed'(x));
      checks += 2;
      if (value(pp_a, res_a) !== W'(xs * 616)) begin
        failures++;
        $display("FAIL x=%0d got %h expected %h", xs, value(pp_a, res_a), W'(xs * 616));
      end
      if (value(pp_b, res_b) !== W'(xs * (1024 - 256 + 64 - 16 + 4 - 1))) begin
        failures++;
        $display("FAIL6 x=%0d", xs);
      end
      checks++;
      if (value(pp_c, res_c) !== W'(xs * -693)) begin
        failures++;
        $display("FAILX x=%0d", xs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
