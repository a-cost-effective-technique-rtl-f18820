`timescale 1ps/1ps
// tb_ts_reg: self-checking test of the temporal-sampling register.
//
// Master clock period 4580 ps, slave clock 640 ps behind it (slave_clk_gen).
// The testbench plays the logic in front of the register: new data arrives
// 710 ps after each master edge (clock-to-Q plus minimum path delay). Each
// cycle is one of:
//   NORMAL  q and q_slave both take the data, mismatch stays low
//   PULSE   a 400 ps transient around the master edge: master takes the bad
//           value, slave the good one, mismatch is raised
//   LONG    a transient lasting past the slave edge: both copies are wrong
//           and nothing is flagged (the pulse is wider than D allows)
//   EARLY   new data arrives 300 ps after the master edge, before the slave
//           edge (min-timing violation): a false mismatch is raised
//   UPSET   a master flipflop flips after the slave edge: mismatch raised
// Outputs are checked at the master falling edge, inside the window where
// mismatch is valid. A reset in the middle clears both copies.
module tb_ts_reg;
  localparam int W = 8;
  typedef enum logic [2:0] {NORMAL, PULSE, LONG, EARLY, UPSET} mode_e;

  logic         clk_master = 1'b0;
  logic         clk_slave;
  logic         rst_n;
  logic [W-1:0] d, q, q_slave;
  logic         mismatch;
  logic [W-1:0] v;
  int checks = 0, failures = 0;
  int mode_count[5];

  always #2290 clk_master = ~clk_master;

  slave_clk_gen #(.D_PS(640)) u_clk (.clk_master(clk_master), .clk_slave(clk_slave));

  ts_reg #(.W(W)) dut (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .d(d), .q(q), .q_slave(q_slave), .mismatch(mismatch)
  );

  task automatic expect3(input logic [W-1:0] eq, input logic [W-1:0] es,
                         input logic em, input string what);
    checks++;
    if (q !== eq || q_slave !== es || mismatch !== em) begin
      failures++;
      $display("FAIL %0t %s: q=%h/%h q_slave=%h/%h mismatch=%b/%b", $time, what,
               q, eq, q_slave, es, mismatch, em);
    end
  endtask

  // Called at a master falling edge; runs up to the next falling edge.
  task automatic cycle(input mode_e mode);
    logic [W-1:0] mask, nxt, eq, es;
    logic         em;
    mask = W'(1) << ($urandom % W);
    nxt  = W'($urandom);
    if (mode == EARLY && nxt == v) nxt = ~v;
    eq = v; es = v; em = 1'b0;
    case (mode)
      PULSE: begin eq = v ^ mask; em = 1'b1; end
      LONG:  begin eq = v ^ mask; es = v ^ mask; end
      EARLY: begin es = nxt; em = 1'b1; end
      UPSET: begin eq = v ^ mask; em = 1'b1; end
      default: ;
    endcase
    #2190;                                   // edge - 100
    if (mode == PULSE || mode == LONG) d = v ^ mask;
    #400;                                    // edge + 300
    if (mode == PULSE) d = v;
    if (mode == EARLY) d = nxt;
    #410;                                    // edge + 710
    d = nxt;
    #290;                                    // edge + 1000
    if (mode == UPSET) begin
      force dut.q = v ^ mask;
      #1 release dut.q;
      #1289;
    end else begin
      #1290;                                 // falling edge
    end
    expect3(eq, es, em, mode.name());
    mode_count[mode]++;
    v = nxt;
  endtask

  initial begin
    #(4580 * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // A falling edge on rst_n, whatever its start value.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    v = W'($urandom);
    d = v;
    #999;
    expect3('0, '0, 1'b0, "reset");
    #500 rst_n = 1'b1;
    #3080;                                   // first falling edge after 2290
    expect3(v, v, 1'b0, "first sample");
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom % 8;
      cycle(r < 4 ? NORMAL : mode_e'(r - 3));
    end
    // Reset in the middle of operation clears both copies.
    #1000 rst_n = 1'b0;
    #10 expect3('0, '0, 1'b0, "reset in operation");
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (mode_count[m] == 0) begin
        failures++;
        $display("FAIL case %s never ran", mode_e'(m));
      end
    end
    $display("cases: normal=%0d pulse=%0d long=%0d early=%0d upset=%0d",
             mode_count[0], mode_count[1], mode_count[2], mode_count[3], mode_count[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
