`timescale 1ps/1ps
// tb_ts_wallace_mult_mintiming: the multiplier with paths too short for the
// slave clock (min-timing violation).
//
// The minimum path delay is cut to 300 ps, so new data reaches each register
// input 480 ps after the master edge, before the slave edge at 640 ps. The
// slave flipflops then take the next value instead of the one the master
// took, and every register whose input changed flags a mismatch although no
// fault was injected. The master path is unaffected: every product must
// still be right. The first register, whose operands change every cycle,
// must flag every cycle; the testbench counts the false alarms.
module tb_ts_wallace_mult_mintiming;
  localparam int W    = 32;
  localparam int NCYC = 400;

  logic            clk_master = 1'b0;
  logic            clk_slave;
  logic            rst_n;
  logic            in_valid;
  logic [W-1:0]    a, b;
  logic            out_valid;
  logic [2*W-1:0]  product;
  logic [4:0]      stage_error;
  logic            error;
  logic            op_valid [NCYC+8];
  logic [2*W-1:0]  op_prod  [NCYC+8];
  int checks = 0, failures = 0, n_false_alarms = 0, n_products = 0;

  always #2290 clk_master = ~clk_master;

  slave_clk_gen #(.D_PS(640)) u_clk (.clk_master(clk_master), .clk_slave(clk_slave));

  ts_wallace_mult #(.T_MIN_PS(300)) dut (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .product(product),
    .stage_error(stage_error), .error(error)
  );

  task automatic new_operands(input int n);
    in_valid = 1'b1;
    a = $urandom;
    b = $urandom;
    op_valid[n] = 1'b1;
    op_prod[n]  = (2*W)'(a) * (2*W)'(b);
  endtask

  initial begin
    #(64'd4580 * 64'(NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    for (int n = 0; n < NCYC + 8; n++) begin op_valid[n] = 1'b0; op_prod[n] = '0; end
    new_operands(1);
    #1499 rst_n = 1'b1;
    #800 new_operands(2);
    #2280;
    for (int n = 2; n < NCYC; n++) begin
      #2300;                                 // edge + 10
      new_operands(n + 1);
      #2280;                                 // falling edge
      // Register 1 took operands n at the master edge, but its slave
      // flipflops saw operands n + 1 (random, so different): mismatch.
      checks++;
      if (stage_error[0] !== 1'b1) begin
        failures++;
        $display("FAIL edge %0d: no false alarm on register 1", n);
      end
      if (error) n_false_alarms++;
      if (n - 4 >= 1) begin
        checks++;
        if (out_valid !== op_valid[n-4] || (op_valid[n-4] && product !== op_prod[n-4])) begin
          failures++;
          $display("FAIL op %0d product=%h exp=%h", n - 4, product, op_prod[n-4]);
        end else if (out_valid) begin
          n_products++;
        end
      end
    end
    checks++;
    if (n_false_alarms == 0 || n_products == 0) failures++;
    $display("false alarms=%0d of %0d cycles, correct products=%0d",
             n_false_alarms, NCYC - 2, n_products);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
