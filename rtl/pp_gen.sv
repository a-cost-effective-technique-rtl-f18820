`timescale 1ps/1ps
// pp_gen: partial products of an unsigned W x W multiplication, without
// Booth encoding.
//
// Row i is the multiplicand a ANDed with multiplier bit b[i] and shifted left
// by i, in a 2W-bit field, so the product is the sum of all W rows. Purely
// combinational. Unsigned operands are a choice of this design.
module pp_gen #(
  parameter int W = 32
) (
  input  logic [W-1:0]            a,
  input  logic [W-1:0]            b,
  output logic [W-1:0][2*W-1:0]   pp
);
  always_comb begin
    for (int i = 0; i < W; i++) begin
      pp[i] = ({{W{1'b0}}, a & {W{b[i]}}}) << i;
    end
  end
endmodule
