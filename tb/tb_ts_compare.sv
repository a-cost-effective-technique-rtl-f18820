`timescale 1ps/1ps
// tb_ts_compare: self-checking test of ts_compare.
// Drives random master/slave pairs, equal pairs and pairs differing in a
// single bit at every position, and checks mismatch against m != s.
module tb_ts_compare;
  localparam int W = 8;
  logic [W-1:0] m, s;
  logic         mismatch;
  int checks = 0, failures = 0;

  ts_compare #(.W(W)) dut (.master_q(m), .slave_q(s), .mismatch(mismatch));

  task automatic check(input logic exp, input string what);
    #1;
    checks++;
    if (mismatch !== exp) begin
      failures++;
      $display("FAIL %s: m=%h s=%h mismatch=%b exp=%b", what, m, s, mismatch, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      m = W'($urandom);
      s = m;
      check(1'b0, "equal");
      for (int b = 0; b < W; b++) begin
        s = m ^ (W'(1) << b);
        check(1'b1, "single-bit difference");
      end
      s = W'($urandom);
      check(m != s, "random pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
