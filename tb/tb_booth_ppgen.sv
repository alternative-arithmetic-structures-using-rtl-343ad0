// tb_booth_ppgen: for random and corner 12-bit signed operands, the six rows
// (bit 0 counted as one half) plus the residue ones must equal a*b modulo
// 2^28; the half-weight column must be even; every Booth digit value must
// appear.
module tb_booth_ppgen;
  localparam int MW = 12, NW = 12, W = 28;
  int checks = 0, failures = 0;
  int seen [5];   // Booth digits -2..2
  logic clk = 0;
  logic [MW-1:0] a;
  logic [NW-1:0] b;
  logic [5:0][W:0] pp;
  logic [2:0] residue;
  always #5 clk = ~clk;
  booth_ppgen #(.MW(MW), .NW(NW), .W(W)) dut (.a(a), .b(b), .pp(pp), .residue(residue));
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check();
    logic [W+1:0] tot;     // in half units
    logic [W-1:0] got;
    longint prod;
    int half;
    tot = '0;
    half = 0;
    for (int k = 0; k < 6; k++) begin
      tot += (W+2)'(pp[k]);
      half += int'(pp[k][0]);
    end
    got = tot[W:1] + W'(residue[0]) + W'(residue[1]) + W'(residue[2]);
    prod = longint'(signed'(a)) * longint'(signed'(b));
    checks++;
    if (got !== W'(prod) || (half % 2) != 0) begin
      failures++;
      $display("FAIL a=%0d b=%0d got %h expected %h", signed'(a), signed'(b), got, W'(prod));
    end
    for (int i = 0; i < NW / 2; i++) begin
      int d;
      d = -2 * int'(b[2*i+1]) + int'(b[2*i]) + ((i == 0) ? 0 : int'(b[2*i-1]));
      seen[d+2]++;
    end
  endtask
  initial begin
    static int corners [6] = '{0, 1, -1, 2047, -2048, -2047};
    foreach (corners[i]) foreach (corners[j]) begin
      a = MW'(corners[i]);
      b = NW'(corners[j]);
      @(posedge clk); check();
    end
    for (int t = 0; t < 3000; t++) begin
      a = MW'($urandom);
      b = NW'($urandom);
      @(posedge clk); check();
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never seen", d - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
