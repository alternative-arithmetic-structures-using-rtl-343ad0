// mv_to_binary: converts one multi-valued digit s in {-1..3} to binary.
//
// Four threshold comparators cmp(k) = (s >= k), k = 0..3, resolve the digit;
// the digit is then written as s = 2*sh + slp - sln with
//   sln = ~cmp(0)                       (s = -1)
//   slp = cmp(1) & (cmp(3) | ~cmp(2))   (s = 1 or 3)
//   sh  = cmp(2)                        (s >= 2)
// so that a number made of such digits splits into a binary number (sh,
// weight doubled) plus a binary signed-digit number (slp - sln). The
// equations and the table they realise follow the reference design, where
// the comparators are differential current comparators. Combinational.
module mv_to_binary
  import arith_pkg::*;
(
  input  mv_digit_t s,
  output logic      sh,
  output logic      slp,
  output logic      sln
);
  logic [3:0] cmp;

  always_comb begin
    for (int k = 0; k < 4; k++) cmp[k] = (s >= mv_digit_t'(k));
  end

  assign sln = ~cmp[0];
  assign slp = cmp[1] & (cmp[3] | ~cmp[2]);
  assign sh  = cmp[2];
endmodule
