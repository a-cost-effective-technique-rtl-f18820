`timescale 1ps/1ps
// tb_pp_gen: self-checking test of pp_gen at the default 32-bit width.
// Each row is checked against b[i] ? a * 2^i : 0, and the sum of all rows
// against the product a * b.
module tb_pp_gen;
  localparam int W = 32;
  logic [W-1:0]          a, b;
  logic [W-1:0][2*W-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen #(.W(W)) dut (.a(a), .b(b), .pp(pp));

  task automatic check();
    logic [2*W-1:0] total, exp_row;
    #1;
    total = '0;
    for (int i = 0; i < W; i++) begin
      exp_row = b[i] ? ({{W{1'b0}}, a} * (64'd1 << i)) : '0;
      checks++;
      if (pp[i] !== exp_row) begin
        failures++;
        $display("FAIL row %0d a=%h b=%h got=%h exp=%h", i, a, b, pp[i], exp_row);
      end
      total += pp[i];
    end
    checks++;
    if (total !== {{W{1'b0}}, a} * {{W{1'b0}}, b}) begin
      failures++;
      $display("FAIL sum a=%h b=%h", a, b);
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
    a = '1; b = '1; check();
    a = '0; b = '1; check();
    for (int i = 0; i < 300; i++) begin
      a = $urandom; b = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
