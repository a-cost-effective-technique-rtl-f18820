`timescale 1ps/1ps
// tb_ts_reg_pulse_sweep: detection of a transient against its width.
//
// A single-bit pulse on the input of a ts_reg starts 100 ps before a master
// edge and lasts w ps, for w from 150 to 1200 ps in 50 ps steps, with the
// slave clock 640 ps behind the master clock. In this zero-setup, zero-hold
// model the master copy is always wrong; the pulse is detected exactly when
// it has ended by the slave edge (w - 100 < 640), and missed, with both
// copies wrong, when it is still present there. The testbench prints the
// widest pulse that was caught, the quantity that the choice of D bounds.
module tb_ts_reg_pulse_sweep;
  localparam int W    = 4;
  localparam int D_PS = 640;

  logic         clk_master = 1'b0;
  logic         clk_slave;
  logic         rst_n;
  logic [W-1:0] d, q, q_slave;
  logic         mismatch;
  int checks = 0, failures = 0;
  int widest_caught = 0, n_caught = 0, n_missed = 0;

  always #2290 clk_master = ~clk_master;

  slave_clk_gen #(.D_PS(D_PS)) u_clk (.clk_master(clk_master), .clk_slave(clk_slave));

  ts_reg #(.W(W)) dut (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .d(d), .q(q), .q_slave(q_slave), .mismatch(mismatch)
  );

  initial begin
    #(4580 * 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    d = 4'h5;
    #1499 rst_n = 1'b1;
    #3080;                                   // falling edge at 4580
    for (int w = 150; w <= 1200; w += 50) begin
      logic caught_exp;
      caught_exp = (w - 100) < D_PS;
      #2190;                                 // edge - 100
      d = 4'h5 ^ 4'h2;
      #(w);
      d = 4'h5;
      #(2290 + 100 - w);                     // falling edge
      checks++;
      if (q !== 4'h7 || mismatch !== caught_exp ||
          q_slave !== (caught_exp ? 4'h5 : 4'h7)) begin
        failures++;
        $display("FAIL width %0d ps: q=%h q_slave=%h mismatch=%b", w, q, q_slave, mismatch);
      end
      if (mismatch) begin
        n_caught++;
        widest_caught = w;
      end else begin
        n_missed++;
      end
      #4580;                                 // one clean cycle
      checks++;
      if (q !== 4'h5 || q_slave !== 4'h5 || mismatch !== 1'b0) begin
        failures++;
        $display("FAIL recovery after width %0d ps", w);
      end
    end
    checks++;
    if (n_caught == 0 || n_missed == 0) failures++;
    $display("D = %0d ps: widest pulse caught = %0d ps (caught %0d, missed %0d)",
             D_PS, widest_caught, n_caught, n_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
