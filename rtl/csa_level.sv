`timescale 1ps/1ps
// csa_level: one level of a Wallace tree.
//
// The N_IN input rows are taken in groups of three; each group goes through
// a row of full adders (3:2 carry-save adders) giving a sum row
// x ^ y ^ z and a carry row maj(x, y, z) shifted left by one. The one or two
// rows left over pass straight through. The sum of the output rows equals
// the sum of the input rows modulo 2^RW, so a product that fits in RW bits is
// preserved. Purely combinational. The Wallace tree follows the multiplier
// as evaluated; its row-wise form with full-width rows is a choice of this
// design.
module csa_level
  import ts_mult_pkg::*;
#(
  parameter int N_IN = 3,
  parameter int RW   = 64
) (
  input  logic [N_IN-1:0][RW-1:0]               rows_in,
  output logic [csa_rows_out(N_IN)-1:0][RW-1:0] rows_out
);
  localparam int GROUPS = N_IN / 3;
  localparam int REST   = N_IN % 3;

  for (genvar g = 0; g < GROUPS; g++) begin : g_csa
    logic [RW-1:0] x, y, z;
    assign x = rows_in[3*g];
    assign y = rows_in[3*g+1];
    assign z = rows_in[3*g+2];
    assign rows_out[2*g]   = x ^ y ^ z;
    assign rows_out[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
  end

  for (genvar r = 0; r < REST; r++) begin : g_pass
    assign rows_out[2*GROUPS+r] = rows_in[3*GROUPS+r];
  end
endmodule
