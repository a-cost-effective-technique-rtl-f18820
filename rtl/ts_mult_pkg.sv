`timescale 1ps/1ps
// ts_mult_pkg: constants and constant functions shared by the Wallace-tree
// multiplier with temporal-sampling error detection.
//
// The Wallace tree is built row-wise: each level takes the rows three at a
// time through 3:2 carry-save adders (two rows out per three in) and passes
// the one or two leftover rows through. The functions below give the number
// of rows after a level, after several levels, and the number of levels
// needed to reach the two rows that the final carry-propagate adder sums.
// The flipflop timing defaults are the 0.18 um library figures and the delay
// choices of the evaluated multiplier (nanoseconds in the source, picoseconds
// here).
package ts_mult_pkg;

  // Flipflop timing of the evaluated library (worst case of each range).
  localparam int unsigned T_SETUP_PS = 170;   // 0.16 ~ 0.17 ns
  localparam int unsigned T_HOLD_PS  = 65;    // 0.06 ~ 0.065 ns
  localparam int unsigned T_CQ_MIN_PS = 180;  // 0.18 ~ 0.348 ns, fastest
  localparam int unsigned T_CQ_MAX_PS = 348;  // 0.18 ~ 0.348 ns, slowest
  // Design choices of the evaluated multiplier.
  localparam int unsigned W_PULSE_PS = 400;   // maximum transient pulse width
  localparam int unsigned T_SKEW_PS  = 50;    // clock skew
  localparam int unsigned D_PS       = 640;   // slave clock delay D
  localparam int unsigned T_MIN_PS   = 530;   // minimum logic path delay

  // Rows left after one level of 3:2 carry-save reduction.
  function automatic int csa_rows_out(input int n);
    return 2 * (n / 3) + (n % 3);
  endfunction

  // Rows left after a number of levels.
  function automatic int rows_after(input int n, input int levels);
    int r;
    r = n;
    for (int i = 0; i < levels; i++) r = csa_rows_out(r);
    return r;
  endfunction

  // Levels needed to bring n rows down to two.
  function automatic int levels_to_two(input int n);
    int r;
    int l;
    r = n;
    l = 0;
    while (r > 2) begin
      r = csa_rows_out(r);
      l++;
    end
    return l;
  endfunction

endpackage
