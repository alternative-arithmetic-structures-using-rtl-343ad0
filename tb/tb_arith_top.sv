// tb_arith_top: end-to-end test of arith_top at its default sizes (no
// parameter overrides). Every unit is driven at once, clock after clock,
// with random and directed stimulus and compared with integer models
// written here:
//   FIR   : convolution with the 25 integer coefficients (impulse response
//           first, then random samples with gaps), out_valid two cycles late
//   MAC   : running sum of a*b modulo 2^28, with clears, idle cycles and a
//           run of extreme products; acc_dcs after two edges, result after
//           three
//   MFIR  : 15-tap filter on four MAC units with random coefficients
//           (loaded at the start and reloaded mid-run), samples at random
//           and at the full rate of one per four clocks; output value and
//           latency checked
//   DCS   : add and subtract of random DCS numbers, partly chained on the
//           previous result
//   CSA, SD adder, counters, 2-bit adder, 8x8 multiplier: exact sums
// Mechanisms counted (each must occur at least once): FIR taps with three
// or fewer nonzero coefficient digits and with four, MAC clear, MAC
// accumulate, MAC idle hold, accumulator beyond 24 bits, MAC-filter stall, full rate and output
// after a coefficient reload, DCS add, DCS
// subtract, negative DCS result, CSA carry, SD digits -1 and 3, counter
// overflow (count >= 4) in both counters, 2-bit adder carry out, multiplier
// products of 2^15 or more.
module tb_arith_top;
  import arith_pkg::*;
  localparam int NT = 25, W = 28, FW = 24;
  localparam int H [NT] = '{-8, -12, -1, 23, 40, 18, -42, -102, -82, 60, 296, 522, 616,
                            522, 296, 60, -82, -102, -42, 18, 40, 23, -1, -12, -8};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              fir_in_valid = 0;
  logic [11:0]       fir_x = '0;
  logic [23:0]       fir_y;
  logic              fir_out_valid;
  logic              mac_in_valid = 0, mac_clear = 0;
  logic [11:0]       mac_a = '0, mac_b = '0;
  logic [2:0][27:0]  mac_acc_dcs;
  logic [27:0]       mac_result;
  logic              mac_result_valid;
  logic              mfir_in_valid = 0, mfir_in_ready;
  logic [11:0]       mfir_x = '0;
  logic              mfir_coef_we = 0;
  logic [3:0]        mfir_coef_addr = '0;
  logic [11:0]       mfir_coef_data = '0;
  logic [27:0]       mfir_y;
  logic              mfir_out_valid;
  logic              das_sub = 0;
  logic [2:0][27:0]  das_a = '0, das_b = '0, das_z;
  logic [27:0]       das_value;
  logic [5:0][15:0]  csa_op = '0;
  logic [15:0]       csa_s, csa_c;
  logic [5:0][7:0]   sdm_x = '0;
  mv_digit_t         sdm_s [10];
  logic [10:0]       sdm_pp, sdm_pn;
  logic [6:0]        cmv_x = '0, c73_x = '0;
  logic              cmv_cout;
  logic [1:0]        cmv_out;
  logic [2:0]        c73_s;
  logic [1:0]        add2_x = '0, add2_y = '0;
  logic              add2_ci = 0;
  logic [2:0]        add2_s;
  logic [7:0]        mul_a = '0, mul_b = '0;
  logic [15:0]       mul_p;

  arith_top dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  typedef enum int {
    M_TAP_SMALL, M_TAP_FOUR, M_MAC_CLEAR, M_MAC_ACC, M_MAC_IDLE, M_MAC_BIG,
    M_MFIR_STALL, M_MFIR_FULL, M_MFIR_RELOAD,
    M_DCS_ADD, M_DCS_SUB, M_DCS_NEG, M_CSA_CARRY, M_SD_M1, M_SD_3,
    M_CMV_OVF, M_C73_OVF, M_ADD2_CO, M_MUL_BIG, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  // number of nonzero digits of the canonical signed-digit form of v
  function automatic int csd_digits(input int v);
    int n = 0;
    while (v != 0) begin
      if (v % 2 != 0) begin
        n++;
        if (((v % 4) + 4) % 4 == 3) v = v + 1; else v = v - 1;
      end
      v = v / 2;
    end
    return n;
  endfunction

  // ---------------- FIR model ----------------
  int fir_hist [NT];
  int fir_n_in = 0;
  logic fv1 = 0, fv2 = 0;
  logic [FW-1:0] fe1, fe2;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (fir_out_valid !== fv2) begin failures++; $display("FAIL fir out_valid"); end
    if (fv2) begin
      checks++;
      if (fir_y !== fe2) begin
        failures++;
        $display("FAIL fir y=%0d expected %0d", signed'(fir_y), signed'(fe2));
      end else if (fir_n_in <= NT + 1 && fir_n_in >= 2) begin
        // impulse phase: output n-2 is coefficient n-2
        if (csd_digits(H[fir_n_in - 2]) <= 3) mech[M_TAP_SMALL]++; else mech[M_TAP_FOUR]++;
      end
    end
    fv2 <= fv1;
    fe2 <= fe1;
    fv1 <= fir_in_valid;
    if (fir_in_valid) begin
      longint acc;
      acc = 0;
      for (int k = NT - 1; k > 0; k--) fir_hist[k] = fir_hist[k-1];
      fir_hist[0] = int'(signed'(fir_x));
      for (int k = 0; k < NT; k++) acc += longint'(H[k]) * fir_hist[k];
      fe1 <= FW'(acc);
    end
    if (fv2) fir_n_in++;
  end

  // ---------------- MAC model ----------------
  logic [W-1:0] mac_model = '0;
  logic mv1 = 0, mv2 = 0, mv3 = 0;
  logic [W-1:0] me1, me2, me3;
  always @(posedge clk) if (rst_n) begin
    if (mv2) begin
      checks++;
      if (W'(mac_acc_dcs[0] + mac_acc_dcs[1] + mac_acc_dcs[2]) !== me2) begin
        failures++;
        $display("FAIL mac acc expected %h", me2);
      end
    end
    checks++;
    if (mac_result_valid !== mv3) begin failures++; $display("FAIL mac result_valid"); end
    if (mv3) begin
      checks++;
      if (mac_result !== me3) begin failures++; $display("FAIL mac result %h expected %h", mac_result, me3); end
    end
    mv3 <= mv2; me3 <= me2;
    mv2 <= mv1; me2 <= me1;
    mv1 <= mac_in_valid;
    if (mac_in_valid) begin
      mac_model = (mac_clear ? '0 : mac_model) + W'(longint'(signed'(mac_a)) * longint'(signed'(mac_b)));
      if (mac_clear) mech[M_MAC_CLEAR]++; else mech[M_MAC_ACC]++;
      if (signed'(mac_model) >= 28'sh0800000 || signed'(mac_model) < -28'sh0800000) mech[M_MAC_BIG]++;
    end else mech[M_MAC_IDLE]++;
    me1 <= mac_model;
  end

  // ---------------- filter on four MAC units ----------------
  localparam int MN = 15, MP = 4;
  int mh [MN], mhist [MN];
  int mcyc = 0, m_last_acc = -100;
  int m_exp_t [$];
  logic [W-1:0] m_exp_y [$];
  bit m_reloaded = 0;
  always @(posedge clk) begin
    mcyc++;
    if (rst_n) begin
      if (mfir_coef_we) mh[mfir_coef_addr] = int'(signed'(mfir_coef_data));
      if (mfir_out_valid) begin
        checks += 2;
        if (m_exp_y.size() == 0) begin
          failures++;
          $display("FAIL mac filter: unexpected output");
        end else begin
          int tt;
          logic [W-1:0] ee;
          tt = m_exp_t.pop_front();
          ee = m_exp_y.pop_front();
          if (mfir_y !== ee) begin failures++; $display("FAIL mac filter y=%h expected %h", mfir_y, ee); end
          if (mcyc - tt != MP + 4) begin failures++; $display("FAIL mac filter latency %0d", mcyc - tt); end
          if (m_reloaded) mech[M_MFIR_RELOAD]++;
        end
      end
      if (mfir_in_valid && !mfir_in_ready) mech[M_MFIR_STALL]++;
      if (mfir_in_valid && mfir_in_ready) begin
        longint acc;
        if (mcyc - m_last_acc == MP) mech[M_MFIR_FULL]++;
        m_last_acc = mcyc;
        for (int k = MN - 1; k > 0; k--) mhist[k] = mhist[k-1];
        mhist[0] = int'(signed'(mfir_x));
        acc = 0;
        for (int k = 0; k < MN; k++) acc += longint'(mh[k]) * mhist[k];
        m_exp_t.push_back(mcyc);
        m_exp_y.push_back(W'(acc));
      end
    end
  end

  // ---------------- combinational units ----------------
  logic [W-1:0] das_prev = '0;
  task automatic check_comb;
    int tot;
    logic [W-1:0] va, vb, vexp;
    logic [15:0] csum;
    // DCS add/subtract
    va = W'(das_a[0] + das_a[1] + das_a[2]);
    vb = W'(das_b[0] + das_b[1] + das_b[2]);
    vexp = das_sub ? W'(va - vb) : W'(va + vb);
    checks += 2;
    if (W'(das_z[0] + das_z[1] + das_z[2]) !== vexp || das_value !== vexp) begin
      failures++;
      $display("FAIL dcs sub=%b value=%h expected %h", das_sub, das_value, vexp);
    end
    if (das_sub) mech[M_DCS_SUB]++; else mech[M_DCS_ADD]++;
    if (vexp[W-1]) mech[M_DCS_NEG]++;
    // six-operand CSA
    csum = '0;
    for (int j = 0; j < 6; j++) csum += csa_op[j];
    checks++;
    if (16'(csa_s + csa_c) !== csum) begin failures++; $display("FAIL csa"); end
    if (csa_c != 0) mech[M_CSA_CARRY]++;
    // signed-digit six-operand adder
    tot = 0;
    for (int j = 0; j < 6; j++) tot += int'(sdm_x[j]);
    begin
      int sd = 0;
      for (int i = 0; i < 10; i++) begin
        sd += int'(sdm_s[i]) <<< i;
        if (sdm_s[i] == -1) mech[M_SD_M1]++;
        if (sdm_s[i] == 3) mech[M_SD_3]++;
      end
      checks += 2;
      if (sd != tot) begin failures++; $display("FAIL sd digits %0d expected %0d", sd, tot); end
      if (int'(sdm_pp) - int'(sdm_pn) != tot) begin failures++; $display("FAIL sd pp-pn"); end
    end
    // counters and 2-bit adder
    checks += 3;
    if (4 * int'(cmv_cout) + int'(cmv_out) != $countones(cmv_x)) begin failures++; $display("FAIL cmv"); end
    if (int'(c73_s) != $countones(c73_x)) begin failures++; $display("FAIL c73"); end
    if (int'(add2_s) != int'(add2_x) + int'(add2_y) + int'(add2_ci)) begin failures++; $display("FAIL add2"); end
    if (cmv_cout) mech[M_CMV_OVF]++;
    if (c73_s[2]) mech[M_C73_OVF]++;
    if (add2_s[2]) mech[M_ADD2_CO]++;
    // multiplier
    checks++;
    if (int'(mul_p) != int'(mul_a) * int'(mul_b)) begin failures++; $display("FAIL mul %0d*%0d=%0d", mul_a, mul_b, mul_p); end
    if (mul_p[15]) mech[M_MUL_BIG]++;
    das_prev = das_value;
  endtask

  function automatic logic [W-1:0] rnd28();
    return W'({$urandom, $urandom});
  endfunction

  initial begin
    foreach (mech[i]) mech[i] = 0;
    foreach (fir_hist[i]) fir_hist[i] = 0;
    foreach (mh[i]) begin mh[i] = 0; mhist[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      // FIR: an impulse and zeros first, then random samples with gaps
      if (t < NT + 2) begin
        fir_in_valid = 1;
        fir_x = (t == 0) ? 12'd1 : 12'd0;
      end else begin
        fir_in_valid = ($urandom % 4) != 0;
        fir_x = 12'($urandom);
      end
      // MAC: random operands, occasional clear, a run of extreme products
      mac_in_valid = ($urandom % 6) != 0;
      mac_clear    = (t == 0) || (($urandom % 150) == 0);
      if (t >= 2000 && t < 3000) begin
        mac_a = 12'h800; mac_b = 12'h801;
        mac_clear = (t == 2000);
        mac_in_valid = 1;
      end else begin
        mac_a = 12'($urandom); mac_b = 12'($urandom);
      end
      // MAC filter: coefficients written at the start and again at t=3000
      // (with the input held off around the reload), samples at random in
      // the first half and at full rate in the second
      mfir_coef_we = 0;
      if (t < MN || (t >= 3000 && t < 3000 + MN)) begin
        mfir_coef_we = 1;
        mfir_coef_addr = 4'(t % 1000);
        mfir_coef_data = 12'($urandom);
      end
      if (t == 3000 + MN) m_reloaded = 1;
      mfir_in_valid = (t >= MN) && !(t >= 2980 && t < 3000 + MN) &&
                      ((t >= 4000) || ($urandom % 3 == 0));
      mfir_x = 12'($urandom);
      // DCS add/subtract, every other operation chained on the last result
      das_sub = 1'($urandom % 2);
      if (t % 2 == 1) das_a = '{28'd0, 28'd0, das_prev}; else das_a = '{rnd28(), rnd28(), rnd28()};
      das_b = '{rnd28(), rnd28(), rnd28()};
      // remaining units
      for (int j = 0; j < 6; j++) begin
        csa_op[j] = 16'($urandom);
        sdm_x[j] = (t % 7 == 0) ? 8'hff : 8'($urandom);
      end
      cmv_x = 7'($urandom);
      c73_x = 7'($urandom);
      {add2_x, add2_y, add2_ci} = 5'($urandom);
      mul_a = 8'($urandom);
      mul_b = 8'($urandom);
      #1 check_comb();
    end
    @(negedge clk);
    fir_in_valid = 0;
    mac_in_valid = 0;
    mfir_in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (m_exp_y.size() != 0) begin failures++; $display("FAIL mac filter: %0d outputs missing", m_exp_y.size()); end
    for (int i = 0; i < M_COUNT; i++) begin
      mech_e m;
      m = mech_e'(i);
      checks++;
      $display("mechanism %s: %0d", m.name(), mech[i]);
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", m.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
