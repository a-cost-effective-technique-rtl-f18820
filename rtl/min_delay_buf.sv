`timescale 1ps/1ps
// min_delay_buf: behavioural model of the hold buffers on short logic paths.
//
// This is a behavioural model, not synthesizable logic: it stands for the
// buffers inserted into paths that are too fast, so that data launched by a
// master clock edge cannot reach the next register before its slave
// flipflops have taken the old value. The scheme requires
//   t_cq + T_min >= D + t_hold.
// The flipflops of the RTL switch with zero clock-to-Q delay and the logic
// settles in zero time, so this model delays its input by the whole earliest
// arrival time t_cq + T_min (defaults 180 ps + 530 ps = 710 ps, against
// D + t_hold = 640 ps + 65 ps). Synthesis ignores the delay and sees a wire;
// in a real implementation the same effect comes from a minimum-delay
// constraint and buffer insertion.
//
// Interface: a in, y out, y follows a after DELAY_PS picoseconds.
module min_delay_buf #(
  parameter int          W         = 8,
  parameter int unsigned T_CQ_PS   = ts_mult_pkg::T_CQ_MIN_PS,
  parameter int unsigned T_MIN_PS  = ts_mult_pkg::T_MIN_PS
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);
  localparam int unsigned DELAY_PS = T_CQ_PS + T_MIN_PS;

  assign #(DELAY_PS) y = a;
endmodule
