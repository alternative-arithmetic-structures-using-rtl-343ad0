// sd_digit_slice: one digit of the six-operand multi-valued signed-digit
// adder.
//
// Adds bit i of six binary operands (0..6). When that count reaches 3 a
// carry of weight 4 (two digit positions up) is produced and 4 is taken
// away, leaving an interim digit u in {-1..2}; the carry from the digit two
// positions below (always 0 or 1) is added, giving a digit s in {-1..3}:
//   cout = (count >= 3),  u = count - 4*cout,  s = u + cin.
// The digit is defined in the radix-4 digit set but has radix-2 weight, so
// no carry ever travels further than to the digit two places up: the adder
// is carry-propagation free whatever its width.
// In the original this slice is a fully differential current-mode circuit
// (input current summation, a comparator for the carry, current subtraction
// of 4 units and addition of the incoming carry). Here the digit values are
// carried as small binary integers; the arithmetic is the same.
// Purely combinational.
module sd_digit_slice
  import arith_pkg::*;
(
  input  logic [5:0]  x,
  input  logic        cin,
  output logic        cout,
  output mv_digit_t   s
);
  logic [2:0] cnt;
  logic signed [3:0] u;

  assign cnt  = ones6(x);
  assign cout = (cnt >= 3'd3);
  assign u    = signed'({1'b0, cnt}) - (cout ? 4'sd4 : 4'sd0);
  assign s    = mv_digit_t'(u + signed'({3'b000, cin}));
endmodule
