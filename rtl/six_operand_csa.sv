// six_operand_csa: adds six binary numbers into carry-save form.
//
// Two counter levels: a row of (6,3) counters turns the six operands into
// three vectors (a DCS number), then a row of (3,2) counters turns those three
// into the usual carry-save pair, so that s + c is the sum of the six
// operands modulo 2^W. On a 6-input-LUT FPGA this is two LUT levels. The
// structure follows the reference design; the width is this design's choice.
// Interface: op[k] is operand k; c is already shifted to its weight (c[0]=0).
// Purely combinational.
module six_operand_csa #(
  parameter int W = 16
) (
  input  logic [5:0][W-1:0] op,
  output logic [W-1:0]      s,
  output logic [W-1:0]      c
);
  logic [2:0][W-1:0] z;
  logic [W-1:0]      cy;

  dcs_reduce63 #(.W(W)) u_red (.op(op), .z(z));

  for (genvar i = 0; i < W; i++) begin : g_fa
    counter32 u_fa (.x(z[0][i]), .y(z[1][i]), .z(z[2][i]), .s(s[i]), .c(cy[i]));
  end

  assign c = {cy[W-2:0], 1'b0};
endmodule
