`timescale 1ps/1ps
// tb_csa_level: self-checking test of one Wallace level.
// Three instances (3, 7 and 32 input rows of 64 bits) get random rows. The
// test checks the number of output rows, the sum row and carry row of the
// first group bit by bit, the passed-through rows, and that the output rows
// add up to the same value as the input rows (modulo 2^64).
module tb_csa_level;
  localparam int RW = 64;
  logic [2:0][RW-1:0]  in3;
  logic [1:0][RW-1:0]  out3;
  logic [6:0][RW-1:0]  in7;
  logic [4:0][RW-1:0]  out7;
  logic [31:0][RW-1:0] in32;
  logic [21:0][RW-1:0] out32;
  int checks = 0, failures = 0;

  csa_level #(.N_IN(3),  .RW(RW)) dut3  (.rows_in(in3),  .rows_out(out3));
  csa_level #(.N_IN(7),  .RW(RW)) dut7  (.rows_in(in7),  .rows_out(out7));
  csa_level #(.N_IN(32), .RW(RW)) dut32 (.rows_in(in32), .rows_out(out32));

  function automatic logic [RW-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic expect_eq(input logic [RW-1:0] got, input logic [RW-1:0] exp,
                           input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got=%h exp=%h", what, got, exp);
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
    logic [RW-1:0] si, so;
    checks++;
    if ($size(out32, 1) != 22 || $size(out7, 1) != 5 || $size(out3, 1) != 2) failures++;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 3; i++)  in3[i]  = rnd64();
      for (int i = 0; i < 7; i++)  in7[i]  = rnd64();
      for (int i = 0; i < 32; i++) in32[i] = rnd64();
      #1;
      // full adder row by bits
      for (int k = 0; k < RW; k++) begin
        logic [1:0] fa;
        fa = 2'(in3[0][k]) + 2'(in3[1][k]) + 2'(in3[2][k]);
        checks++;
        if (out3[0][k] !== fa[0]) failures++;
        if (k + 1 < RW) begin
          checks++;
          if (out3[1][k+1] !== fa[1]) failures++;
        end
      end
      checks++;
      if (out3[1][0] !== 1'b0) failures++;
      // pass-through rows
      expect_eq(out7[4], in7[6], "7-row pass-through");
      expect_eq(out32[20], in32[30], "32-row pass-through 0");
      expect_eq(out32[21], in32[31], "32-row pass-through 1");
      // sums preserved
      si = '0; so = '0;
      for (int i = 0; i < 3; i++) si += in3[i];
      for (int i = 0; i < 2; i++) so += out3[i];
      expect_eq(so, si, "3-row sum");
      si = '0; so = '0;
      for (int i = 0; i < 7; i++) si += in7[i];
      for (int i = 0; i < 5; i++) so += out7[i];
      expect_eq(so, si, "7-row sum");
      si = '0; so = '0;
      for (int i = 0; i < 32; i++) si += in32[i];
      for (int i = 0; i < 22; i++) so += out32[i];
      expect_eq(so, si, "32-row sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
