`timescale 1ps/1ps
// ts_reg: pipeline register with temporal sampling.
//
// The input d is sampled twice. The master flipflops take it on the rising
// edge of clk_master and drive q at once, so the next pipeline stage never
// waits for the check. The slave flipflops take the same d on the rising edge
// of clk_slave, the master clock delayed by D. If a transient pulse on d was
// captured by the master flipflops, it has died away by the slave edge
// provided D >= t_hold + W + t_setup + t_skew, and ts_compare then reports a
// mismatch. An upset of a master or slave flipflop itself also shows as a
// mismatch. For the slave to see the old data, new data must not reach d
// before D + t_hold after the master edge (min-timing constraint); in this
// design that is the job of min_delay_buf in front of d.
//
// Interface: clk_master, clk_slave, asynchronous active-low rst_n (clears
// both copies, a choice of this design), d, q (master copy), q_slave and
// mismatch. mismatch is valid from the slave edge until the next master edge.
// The two samplings, the immediate forwarding of the master copy and the
// comparison follow the technique; the reset and the q_slave output are
// choices of this design.
module ts_reg #(
  parameter int W = 8
) (
  input  logic         clk_master,
  input  logic         clk_slave,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_slave,
  output logic         mismatch
);
  // Master flipflops: first sampling, feed the next stage.
  always_ff @(posedge clk_master or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

  // Slave flipflops: second sampling, used only for checking.
  always_ff @(posedge clk_slave or negedge rst_n) begin
    if (!rst_n) q_slave <= '0;
    else        q_slave <= d;
  end

  ts_compare #(.W(W)) u_cmp (
    .master_q(q),
    .slave_q (q_slave),
    .mismatch(mismatch)
  );
endmodule
