// dcs_to_binary: converts a double carry-save number to binary.
//
// The value of a DCS number is Sa + Sb + Sc, so conversion is a
// three-operand addition. It is written as one row of (3,2) counters
// followed by a single carry-propagate addition. This is the only place a
// carry chain appears in the DCS datapaths, and it is needed once, after the
// last accumulation. The reference design names a three-operand adder; its
// inner structure is this design's choice. Modulo 2^W, combinational.
module dcs_to_binary #(
  parameter int W = 28
) (
  input  logic [2:0][W-1:0] z,
  output logic [W-1:0]      sum
);
  logic [W-1:0] s, c;

  for (genvar i = 0; i < W; i++) begin : g_fa
    counter32 u_fa (.x(z[0][i]), .y(z[1][i]), .z(z[2][i]), .s(s[i]), .c(c[i]));
  end

  assign sum = s + {c[W-2:0], 1'b0};
endmodule
