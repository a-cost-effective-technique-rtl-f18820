`timescale 1ps/1ps
// ts_wallace_mult: five-stage unsigned WIDTH x WIDTH Wallace-tree multiplier
// whose pipeline registers detect soft errors by temporal sampling.
//
// Datapath (each stage ends in a ts_reg):
//   stage 1  partial products (pp_gen) and the first S1_LEVELS Wallace levels
//   stage 2  the next S2_LEVELS Wallace levels
//   stage 3  the remaining levels, down to two rows
//   stage 4  low half of the final adder; its carry is registered
//   stage 5  high half of the final adder; the product is registered
// For WIDTH = 32 the tree has eight levels (32, 22, 15, 10, 7, 5, 4, 3, 2
// rows), split 2 + 3 + 3. A valid bit travels with the data.
//
// Every register has master flipflops on clk_master, whose outputs feed the
// next stage immediately, and slave flipflops on clk_slave, the master clock
// delayed by D; clk_slave is an input because both clocks are distributed
// globally. In front of each register a min_delay_buf models the hold buffers
// that keep new data away until the slave flipflops have sampled. The five
// register mismatch flags come out on stage_error and, ORed, on error.
//
// Timing: operands a, b and in_valid are applied after a master edge and
// sampled at the next one; the product appears on product/out_valid five
// master edges later (latency = 5 clock cycles). error and stage_error are
// meaningful from each slave edge until the next master edge; a flag seen
// there refers to the data the registers captured at the last master edge.
// A result is confirmed when error is low in that window after it appears on
// product.
//
// The multiplier size, five stages, no Booth encoding, the Wallace tree,
// the doubled flipflops, the comparison and the global clocks follow the
// scheme as evaluated. Unsigned operands, the split of the tree over the
// stages, the two-stage final adder, the valid bit and the reset are choices
// of this design.
module ts_wallace_mult #(
  parameter int          WIDTH     = 32,
  parameter int          S1_LEVELS = 2,
  parameter int          S2_LEVELS = 3,
  parameter int unsigned T_CQ_PS   = ts_mult_pkg::T_CQ_MIN_PS,
  parameter int unsigned T_MIN_PS  = ts_mult_pkg::T_MIN_PS
) (
  input  logic                 clk_master,
  input  logic                 clk_slave,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic                 out_valid,
  output logic [2*WIDTH-1:0]   product,
  output logic [4:0]           stage_error,
  output logic                 error
);
  localparam int RW = 2 * WIDTH;
  localparam int N1 = ts_mult_pkg::rows_after(WIDTH, S1_LEVELS);
  localparam int N2 = ts_mult_pkg::rows_after(N1, S2_LEVELS);
  localparam int S3_LEVELS = ts_mult_pkg::levels_to_two(N2);
  localparam int N3 = ts_mult_pkg::rows_after(N2, S3_LEVELS);

  localparam int R1_W = 1 + N1 * RW;
  localparam int R2_W = 1 + N2 * RW;
  localparam int R3_W = 1 + 2 * RW;
  localparam int R4_W = 1 + WIDTH + 1 + 2 * WIDTH;
  localparam int R5_W = 1 + RW;

  // ---------------- stage 1: partial products, first levels -------------
  logic [WIDTH-1:0][RW-1:0] pp;
  logic [N1-1:0][RW-1:0]    s1_rows;
  logic [R1_W-1:0]          s1_d, s1_d_buf, s1_q;

  pp_gen #(.W(WIDTH)) u_pp (.a(a), .b(b), .pp(pp));

  wallace_stage #(.N_IN(WIDTH), .LEVELS(S1_LEVELS), .RW(RW)) u_w1 (
    .rows_in(pp), .rows_out(s1_rows)
  );

  assign s1_d = {in_valid, s1_rows};

  min_delay_buf #(.W(R1_W), .T_CQ_PS(T_CQ_PS), .T_MIN_PS(T_MIN_PS)) u_b1 (
    .a(s1_d), .y(s1_d_buf)
  );

  ts_reg #(.W(R1_W)) u_r1 (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .d(s1_d_buf), .q(s1_q), .q_slave(), .mismatch(stage_error[0])
  );

  // ---------------- stage 2: middle levels -------------------------------
  logic [N2-1:0][RW-1:0] s2_rows;
  logic [R2_W-1:0]       s2_d, s2_d_buf, s2_q;

  wallace_stage #(.N_IN(N1), .LEVELS(S2_LEVELS), .RW(RW)) u_w2 (
    .rows_in(s1_q[N1*RW-1:0]), .rows_out(s2_rows)
  );

  assign s2_d = {s1_q[R1_W-1], s2_rows};

  min_delay_buf #(.W(R2_W), .T_CQ_PS(T_CQ_PS), .T_MIN_PS(T_MIN_PS)) u_b2 (
    .a(s2_d), .y(s2_d_buf)
  );

  ts_reg #(.W(R2_W)) u_r2 (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .d(s2_d_buf), .q(s2_q), .q_slave(), .mismatch(stage_error[1])
  );

  // ---------------- stage 3: last levels, two rows ------------------------
  logic [N3-1:0][RW-1:0] s3_rows;
  logic [R3_W-1:0]       s3_d, s3_d_buf, s3_q;

  wallace_stage #(.N_IN(N2), .LEVELS(S3_LEVELS), .RW(RW)) u_w3 (
    .rows_in(s2_q[N2*RW-1:0]), .rows_out(s3_rows)
  );

  assign s3_d = {s2_q[R2_W-1], s3_rows};

  min_delay_buf #(.W(R3_W), .T_CQ_PS(T_CQ_PS), .T_MIN_PS(T_MIN_PS)) u_b3 (
    .a(s3_d), .y(s3_d_buf)
  );

  ts_reg #(.W(R3_W)) u_r3 (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .d(s3_d_buf), .q(s3_q), .q_slave(), .mismatch(stage_error[2])
  );

  // ---------------- stage 4: low half of the final adder -----------------
  logic [RW-1:0]    s3_row0, s3_row1;
  logic [WIDTH-1:0] s4_sum_lo;
  logic             s4_carry;
  logic [R4_W-1:0]  s4_d, s4_d_buf, s4_q;

  assign s3_row0 = s3_q[RW-1:0];
  assign s3_row1 = s3_q[2*RW-1:RW];

  cpa_slice #(.W(WIDTH)) u_add_lo (
    .a(s3_row0[WIDTH-1:0]), .b(s3_row1[WIDTH-1:0]), .cin(1'b0),
    .sum(s4_sum_lo), .cout(s4_carry)
  );

  assign s4_d = {s3_q[R3_W-1], s3_row1[RW-1:WIDTH], s3_row0[RW-1:WIDTH],
                 s4_carry, s4_sum_lo};

  min_delay_buf #(.W(R4_W), .T_CQ_PS(T_CQ_PS), .T_MIN_PS(T_MIN_PS)) u_b4 (
    .a(s4_d), .y(s4_d_buf)
  );

  ts_reg #(.W(R4_W)) u_r4 (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .d(s4_d_buf), .q(s4_q), .q_slave(), .mismatch(stage_error[3])
  );

  // ---------------- stage 5: high half of the final adder ----------------
  logic [WIDTH-1:0] s5_sum_hi;
  logic             s5_cout_unused;
  logic [R5_W-1:0]  s5_d, s5_d_buf, s5_q;

  // The product fits in 2*WIDTH bits, so the final carry out is always 0.
  cpa_slice #(.W(WIDTH)) u_add_hi (
    .a(s4_q[WIDTH+1 +: WIDTH]), .b(s4_q[2*WIDTH+1 +: WIDTH]), .cin(s4_q[WIDTH]),
    .sum(s5_sum_hi), .cout(s5_cout_unused)
  );

  assign s5_d = {s4_q[R4_W-1], s5_sum_hi, s4_q[WIDTH-1:0]};

  min_delay_buf #(.W(R5_W), .T_CQ_PS(T_CQ_PS), .T_MIN_PS(T_MIN_PS)) u_b5 (
    .a(s5_d), .y(s5_d_buf)
  );

  ts_reg #(.W(R5_W)) u_r5 (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .d(s5_d_buf), .q(s5_q), .q_slave(), .mismatch(stage_error[4])
  );

  assign out_valid = s5_q[R5_W-1];
  assign product   = s5_q[RW-1:0];

  // Error collection: any register whose two samples disagree.
  assign error = |stage_error;

  // The tree split must leave exactly two rows for the final adder, and the
  // min-timing model must keep new data away until the slave flipflops
  // (D after the master edge, plus their hold time) have sampled.
  initial begin
    assert (N3 == 2) else $error("Wallace tree split does not end in two rows");
    assert (T_CQ_PS + T_MIN_PS >= ts_mult_pkg::D_PS + ts_mult_pkg::T_HOLD_PS)
      else $warning("min-timing violated: t_cq + T_min < D + t_hold, expect false errors");
  end
endmodule
