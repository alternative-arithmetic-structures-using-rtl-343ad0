// tb_mac_dcs: runs random multiply-accumulate sequences (12x12 signed
// operands) with clears, idle cycles and long runs that exceed 24 bits, and
// compares acc_dcs (as Sa+Sb+Sc) after the second clock edge following each
// input and result after the third, against an integer model modulo 2^28.
// Also checks that result_valid rises exactly three edges after in_valid is
// sampled (input register, accumulator register, output register).
module tb_mac_dcs;
  localparam int MW = 12, NW = 12, W = 28;
  int checks = 0, failures = 0;
  int n_clear = 0, n_idle = 0, n_big = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, clear = 0;
  logic [MW-1:0] a = '0;
  logic [NW-1:0] b = '0;
  logic [2:0][W-1:0] acc_dcs;
  logic [W-1:0] result;
  logic result_valid;
  always #5 clk = ~clk;
  mac_dcs #(.MW(MW), .NW(NW), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(clear), .a(a), .b(b),
    .acc_dcs(acc_dcs), .result(result), .result_valid(result_valid));
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pipeline: model[t] is the accumulator after the input of edge t
  logic [W-1:0] model = '0;
  logic [W-1:0] exp_acc_q [$];
  logic         vin_d1 = 0, vin_d2 = 0, vin_d3 = 0;
  logic [W-1:0] exp_d1, exp_d2, exp_d3;

  always @(posedge clk) begin
    if (rst_n) begin
      // check values produced by earlier inputs
      if (vin_d2) begin
        checks++;
        if (W'(acc_dcs[0] + acc_dcs[1] + acc_dcs[2]) !== exp_d2) begin
          failures++;
          $display("FAIL acc %h expected %h", W'(acc_dcs[0] + acc_dcs[1] + acc_dcs[2]), exp_d2);
        end
      end
      checks++;
      if (result_valid !== vin_d3) begin
        failures++;
        $display("FAIL result_valid=%b expected %b", result_valid, vin_d3);
      end
      if (vin_d3) begin
        checks++;
        if (result !== exp_d3) begin
          failures++;
          $display("FAIL result %h expected %h", result, exp_d3);
        end
      end
      vin_d3 <= vin_d2;
      exp_d3 <= exp_d2;
      vin_d2 <= vin_d1;
      exp_d2 <= exp_d1;
      vin_d1 <= in_valid;
      if (in_valid) begin
        logic [W-1:0] nx;
        nx = (clear ? '0 : model) + W'(longint'(signed'(a)) * longint'(signed'(b)));
        model  = nx;
        exp_d1 <= nx;
        if (clear) n_clear++;
        if (signed'(nx) > 28'sh07fffff || signed'(nx) < -28'sh0800000) n_big++;
      end else begin
        exp_d1 <= model;
        n_idle++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      clear    = (t == 0) || (($urandom % 100) == 0);
      if ((t / 500) % 2 == 1) begin
        // long run of extreme products to leave the 24-bit range
        a = 12'h800;
        b = 12'h800;
        clear = clear && (t % 500 == 0);
      end else begin
        a = MW'($urandom);
        b = NW'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks += 3;
    if (n_clear == 0) begin failures++; $display("FAIL no clear"); end
    if (n_idle == 0)  begin failures++; $display("FAIL no idle cycle"); end
    if (n_big == 0)   begin failures++; $display("FAIL never beyond 24 bits"); end
    $display("clears=%0d idle=%0d beyond24=%0d", n_clear, n_idle, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
