`timescale 1ps/1ps
// tb_min_delay_buf: self-checking test of the hold-buffer model at its
// defaults (t_cq 180 ps + T_min 530 ps). After each input change the output
// must still hold the old value at the slave edge (D = 640 ps) and at the
// end of the slave hold time (D + t_hold = 705 ps), and the new value once
// the full 710 ps have passed.
module tb_min_delay_buf;
  localparam int W = 8;
  logic [W-1:0] a, y;
  int checks = 0, failures = 0;

  min_delay_buf #(.W(W)) dut (.a(a), .y(y));

  task automatic expect_eq(input logic [W-1:0] exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %0t %s: y=%h exp=%h", $time, what, y, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] old_v, new_v;
    a = '0;
    #2000;
    expect_eq('0, "settled");
    old_v = '0;
    for (int t = 0; t < 100; t++) begin
      new_v = W'($urandom);
      if (new_v == old_v) new_v = ~old_v;
      a = new_v;
      #640; expect_eq(old_v, "at slave edge");
      #65;  expect_eq(old_v, "at end of hold");
      #6;   expect_eq(new_v, "after earliest arrival");
      #3869;
      old_v = new_v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
