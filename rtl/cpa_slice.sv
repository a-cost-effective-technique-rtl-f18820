`timescale 1ps/1ps
// cpa_slice: carry-propagate adder slice, {cout, sum} = a + b + cin.
//
// Two slices in consecutive pipeline stages add the two rows left by the
// Wallace tree: the low half first, its carry registered, then the high
// half. Purely combinational; the adder architecture is left to synthesis.
// The final adder and its split over two stages are choices of this design.
module cpa_slice #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  assign {cout, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
endmodule
