`timescale 1ps/1ps
// slave_clk_gen: behavioural model of the slave clock source, for testbenches.
//
// The slave clock is the master clock delayed by D (default 640 ps). In the
// multiplier both clocks are distributed globally, so this model stands for
// the clock network outside the design; it could equally be a buffer chain
// that derives the slave clock locally from the master clock.
module slave_clk_gen #(
  parameter int unsigned D_PS = 640
) (
  input  logic clk_master,
  output logic clk_slave
);
  assign #(D_PS) clk_slave = clk_master;
endmodule
