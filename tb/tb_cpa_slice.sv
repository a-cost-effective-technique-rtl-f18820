`timescale 1ps/1ps
// tb_cpa_slice: self-checking test of cpa_slice at its default width.
// Random and corner operands with both carry-in values, checked against a
// wider sum computed in the testbench.
module tb_cpa_slice;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cpa_slice #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check();
    logic [W:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got=%h exp=%h", a, b, cin, {cout, sum}, exp);
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
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
