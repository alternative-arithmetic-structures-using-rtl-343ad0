// mac_dcs: multiply-accumulate unit in double carry-save arithmetic.
//
// Computes acc <= acc + a*b for MW x NW two's complement operands into a
// W-bit accumulator (12 x 12 -> 24-bit product, sign-extended to 28 bits so
// that repeated accumulation does not overflow). The accumulator is kept as
// a DCS number (three W-bit vectors), so one multiply-add is only three
// LUT levels: Booth recoding/selection, one (6,3) level that reduces the six
// partial products to a DCS product, and one (6,3) level that adds the
// product to the accumulator. No carry chain is on this loop; the binary
// value is produced by a three-operand adder in a separate pipeline stage.
//
// Interface and timing (one operation per clock):
//   edge t      : in_valid=1, a, b, clear sampled into input registers
//   after edge t+1: acc_dcs holds the new sum (clear=1 starts from zero)
//   after edge t+2: result = binary value of acc_dcs, result_valid=1
// Reset (rst_n low, asynchronous) clears all registers.
// Structure and sizes follow the reference design; the input/output register
// placement, the clear/in_valid handshake and the reset are this design's
// choices.
module mac_dcs #(
  parameter int MW = 12,
  parameter int NW = 12,
  parameter int W  = 28
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              clear,
  input  logic [MW-1:0]     a,
  input  logic [NW-1:0]     b,
  output logic [2:0][W-1:0] acc_dcs,
  output logic [W-1:0]      result,
  output logic              result_valid
);
  logic [MW-1:0]     a_r;
  logic [NW-1:0]     b_r;
  logic              v_r, clr_r, acc_v;
  logic [5:0][W:0]   pp;
  logic [2:0]        residue;
  logic [2:0][W:0]   prod_full;
  logic [2:0][W-1:0] prod, acc_in, acc_nx;
  logic [W-1:0]      bin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r   <= '0;
      b_r   <= '0;
      v_r   <= 1'b0;
      clr_r <= 1'b0;
    end else begin
      v_r <= in_valid;
      if (in_valid) begin
        a_r   <= a;
        b_r   <= b;
        clr_r <= clear;
      end
    end
  end

  booth_ppgen #(.MW(MW), .NW(NW), .W(W)) u_booth (
    .a(a_r), .b(b_r), .pp(pp), .residue(residue)
  );

  // product reduction: six rows -> DCS product (one (6,3) level)
  dcs_reduce63 #(.W(W + 1)) u_mul (.op(pp), .z(prod_full));

  assign prod[0] = prod_full[0][W:1];
  assign prod[1] = prod_full[1][W:1];
  assign prod[2] = prod_full[2][W:1];

  assign acc_in = clr_r ? '0 : acc_dcs;

  // accumulation: product + accumulator + residue (one (6,3) level)
  dcs_accumulate #(.W(W)) u_acc (.p(prod), .acc(acc_in), .residue(residue), .z(acc_nx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_dcs <= '0;
      acc_v   <= 1'b0;
    end else begin
      acc_v <= v_r;
      if (v_r) acc_dcs <= acc_nx;
    end
  end

  dcs_to_binary #(.W(W)) u_conv (.z(acc_dcs), .sum(bin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= acc_v;
      if (acc_v) result <= bin;
    end
  end

  always_comb begin
    if (v_r) assert (prod_full[0][0] == 1'b0) else $error("mac_dcs: odd half-weight column");
  end
endmodule
