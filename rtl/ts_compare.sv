`timescale 1ps/1ps
// ts_compare: checks the two samples of one temporal-sampling register.
//
// Each master bit is compared with its slave copy (a per-bit equality, the
// XNOR of the scheme) and the per-bit results are folded into a single
// mismatch flag (the OR of the scheme): mismatch = 1 when any bit differs.
// Purely combinational. The flag means something only between the slave
// clock edge and the next master clock edge; between a master edge and the
// following slave edge the master copy is already new while the slave copy is
// still old, so the flag must not be sampled in that interval.
// The XNOR-then-combine comparison follows the technique; bringing the flag
// out per register is a choice of this design.
module ts_compare #(
  parameter int W = 8
) (
  input  logic [W-1:0] master_q,
  input  logic [W-1:0] slave_q,
  output logic         mismatch
);
  logic [W-1:0] bit_equal;

  assign bit_equal = ~(master_q ^ slave_q);
  assign mismatch  = ~&bit_equal;
endmodule
