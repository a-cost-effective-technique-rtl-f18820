`timescale 1ps/1ps
// tb_wallace_stage: self-checking test of wallace_stage.
// The 32 partial-product rows of random 32-bit operands (formed in the
// testbench) go through the full eight-level tree, the two-level first stage
// and a zero-level stage. The row counts and the row sums are checked
// against the product computed in the testbench.
module tb_wallace_stage;
  localparam int W  = 32;
  localparam int RW = 64;
  logic [W-1:0]        a, b;
  logic [W-1:0][RW-1:0] pp;
  logic [1:0][RW-1:0]  full_out;
  logic [14:0][RW-1:0] two_out;
  logic [W-1:0][RW-1:0] zero_out;
  int checks = 0, failures = 0;

  wallace_stage #(.N_IN(W), .LEVELS(8), .RW(RW)) dut_full (.rows_in(pp), .rows_out(full_out));
  wallace_stage #(.N_IN(W), .LEVELS(2), .RW(RW)) dut_two  (.rows_in(pp), .rows_out(two_out));
  wallace_stage #(.N_IN(W), .LEVELS(0), .RW(RW)) dut_zero (.rows_in(pp), .rows_out(zero_out));

  task automatic expect_eq(input logic [RW-1:0] got, input logic [RW-1:0] exp,
                           input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RW-1:0] prod, s;
    checks++;
    if ($size(two_out, 1) != 15 || $size(full_out, 1) != 2) failures++;
    for (int t = 0; t < 400; t++) begin
      a = (t == 0) ? '1 : $urandom;
      b = (t == 0) ? '1 : $urandom;
      for (int i = 0; i < W; i++) pp[i] = b[i] ? (RW'(a) << i) : '0;
      prod = RW'(a) * RW'(b);
      #1;
      expect_eq(full_out[0] + full_out[1], prod, "eight levels");
      s = '0;
      for (int i = 0; i < 15; i++) s += two_out[i];
      expect_eq(s, prod, "two levels");
      s = '0;
      for (int i = 0; i < W; i++) s += zero_out[i];
      expect_eq(s, prod, "no level");
      expect_eq(zero_out[5], pp[5], "no level, row 5 unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
