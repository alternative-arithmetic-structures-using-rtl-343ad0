// arith_top: the two arithmetic families side by side.
//
// FPGA redundant arithmetic (double carry-save, DCS):
//   * fir_*  : 25-tap fixed-coefficient low-pass FIR filter (fir_dcs)
//   * mac_*  : 12x12 multiply-accumulate unit with a 28-bit DCS accumulator
//   * mfir_* : 15-tap variable-coefficient FIR filter on four MAC units,
//              one sample every four clocks (mac_fir)
//   * das_*  : DCS add/subtract unit (dcs_addsub), with the binary value of
//              its result (dcs_to_binary)
//   * csa_*  : six-operand adder into carry-save form (six_operand_csa)
// Multi-valued (current-mode) arithmetic, as logic:
//   * sdm_*  : six-operand adder with signed-digit output (sd_mo_adder)
//   * cmv_*  : seven-input counter with a four-level output
//   * c73_*  : binary-restored (7,3) counter
//   * add2_* : two-bit adder on the counter's output stage
//   * mul_*  : 8x8 multiplier built with the (7,3) counters
// The units share no signals; clk/rst_n drive the three sequential ones (the two
// filters and the MAC). Timing of each unit is described in its own module.
module arith_top
  import arith_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // FIR filter
  input  logic              fir_in_valid,
  input  logic [11:0]       fir_x,
  output logic [23:0]       fir_y,
  output logic              fir_out_valid,
  // multiply-accumulate unit
  input  logic              mac_in_valid,
  input  logic              mac_clear,
  input  logic [11:0]       mac_a,
  input  logic [11:0]       mac_b,
  output logic [2:0][27:0]  mac_acc_dcs,
  output logic [27:0]       mac_result,
  output logic              mac_result_valid,
  // FIR filter on several MAC units
  input  logic              mfir_in_valid,
  output logic              mfir_in_ready,
  input  logic [11:0]       mfir_x,
  input  logic              mfir_coef_we,
  input  logic [3:0]        mfir_coef_addr,
  input  logic [11:0]       mfir_coef_data,
  output logic [27:0]       mfir_y,
  output logic              mfir_out_valid,
  // DCS add/subtract
  input  logic              das_sub,
  input  logic [2:0][27:0]  das_a,
  input  logic [2:0][27:0]  das_b,
  output logic [2:0][27:0]  das_z,
  output logic [27:0]       das_value,
  // six-operand carry-save adder
  input  logic [5:0][15:0]  csa_op,
  output logic [15:0]       csa_s,
  output logic [15:0]       csa_c,
  // six-operand multi-valued signed-digit adder
  input  logic [5:0][7:0]   sdm_x,
  output mv_digit_t         sdm_s [10],
  output logic [10:0]       sdm_pp,
  output logic [10:0]       sdm_pn,
  // counter with multi-valued output
  input  logic [6:0]        cmv_x,
  output logic              cmv_cout,
  output logic [1:0]        cmv_out,
  // binary-restored (7,3) counter
  input  logic [6:0]        c73_x,
  output logic [2:0]        c73_s,
  // two-bit adder
  input  logic [1:0]        add2_x,
  input  logic [1:0]        add2_y,
  input  logic              add2_ci,
  output logic [2:0]        add2_s,
  // 8x8 multiplier
  input  logic [7:0]        mul_a,
  input  logic [7:0]        mul_b,
  output logic [15:0]       mul_p
);
  fir_dcs u_fir (
    .clk(clk), .rst_n(rst_n), .in_valid(fir_in_valid), .x(fir_x),
    .y(fir_y), .out_valid(fir_out_valid)
  );

  mac_dcs u_mac (
    .clk(clk), .rst_n(rst_n), .in_valid(mac_in_valid), .clear(mac_clear),
    .a(mac_a), .b(mac_b), .acc_dcs(mac_acc_dcs), .result(mac_result),
    .result_valid(mac_result_valid)
  );

  mac_fir u_mfir (
    .clk(clk), .rst_n(rst_n), .in_valid(mfir_in_valid), .in_ready(mfir_in_ready),
    .x(mfir_x), .coef_we(mfir_coef_we), .coef_addr(mfir_coef_addr),
    .coef_data(mfir_coef_data), .y(mfir_y), .out_valid(mfir_out_valid)
  );

  dcs_addsub #(.W(28)) u_das (.sub(das_sub), .a(das_a), .b(das_b), .z(das_z));
  dcs_to_binary #(.W(28)) u_das_bin (.z(das_z), .sum(das_value));

  six_operand_csa #(.W(16)) u_csa (.op(csa_op), .s(csa_s), .c(csa_c));

  sd_mo_adder #(.N(8)) u_sdm (.x(sdm_x), .s(sdm_s), .pp(sdm_pp), .pn(sdm_pn));

  mv_counter_mvout u_cmv (.x(cmv_x), .cout(cmv_cout), .out(cmv_out));

  mv_counter73 u_c73 (.x(c73_x), .s(c73_s));

  mv_adder2 u_add2 (.x(add2_x), .y(add2_y), .ci(add2_ci), .s(add2_s));

  mv_mult8x8 u_mul (.a(mul_a), .b(mul_b), .p(mul_p));
endmodule
