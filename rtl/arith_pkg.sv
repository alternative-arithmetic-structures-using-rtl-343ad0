// arith_pkg: types and helpers shared by the arithmetic blocks.
//
// mv_digit_t carries one multi-valued digit of the signed-digit six-operand
// adder (values -1..3) as a small two's complement integer. In the original
// current-mode circuits such a digit is a pair of complementary currents in
// steps of a unit current; here the same digit value is kept in binary.
// ones6/ones7 count the ones of a bit vector; they are the arithmetic that
// the (6,3) and (7,3) counters perform.
package arith_pkg;

  typedef logic signed [2:0] mv_digit_t;

  function automatic logic [2:0] ones6(input logic [5:0] v);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < 6; i++) n = n + 3'(v[i]);
    return n;
  endfunction

  function automatic logic [2:0] ones7(input logic [6:0] v);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < 7; i++) n = n + 3'(v[i]);
    return n;
  endfunction

endpackage
