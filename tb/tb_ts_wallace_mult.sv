`timescale 1ps/1ps
// tb_ts_wallace_mult: end-to-end self-checking test of the 32-bit, five-stage
// multiplier with temporal sampling, at the design's default parameters.
//
// Clocks: master period 4580 ps, slave clock 640 ps behind (slave_clk_gen).
// Operands come from testbench flipflops that switch just after each master
// edge; about one cycle in five is a bubble (in_valid = 0). Every product is
// checked against a * b, five master edges after it was applied.
//
// On about one cycle in three one fault is injected into one of the five
// pipeline registers, chosen at random:
//   transient  a 400 ps flip of one data bit at the register input around
//              the master edge; the register's stage_error bit must rise in
//              the check window and the result of that operation must differ
//              from a * b (the flag marks a real corruption)
//   upset      one master flipflop bit flips after the slave edge; same
//              expectations
//   long       an 800 ps flip that still lasts at the slave edge; both copies
//              are wrong, nothing is flagged and the result differs: the
//              case that a large enough D rules out
// stage_error and error are checked at every master falling edge. Each
// mechanism (products, back-to-back results, bubbles, each kind of fault in
// each stage, reset) is counted and must occur at least once.
module tb_ts_wallace_mult;
  localparam int W     = 32;
  localparam int NCYC  = 3000;
  typedef enum logic [1:0] {NONE, TRANSIENT, UPSET, LONG} inj_e;

  logic            clk_master = 1'b0;
  logic            clk_slave;
  logic            rst_n;
  logic            in_valid;
  logic [W-1:0]    a, b;
  logic            out_valid;
  logic [2*W-1:0]  product;
  logic [4:0]      stage_error;
  logic            error;

  int checks = 0, failures = 0;
  // Operation captured into the first register at master edge n.
  logic            op_valid [NCYC+8];
  logic [2*W-1:0]  op_prod  [NCYC+8];
  logic            op_taint [NCYC+8];

  int n_products = 0, n_back_to_back = 0, n_bubbles = 0, n_reset = 0;
  int n_transient[5], n_upset[5], n_long[5], n_wrong_flagged = 0;

  always #2290 clk_master = ~clk_master;

  slave_clk_gen #(.D_PS(640)) u_clk (.clk_master(clk_master), .clk_slave(clk_slave));

  ts_wallace_mult dut (
    .clk_master(clk_master), .clk_slave(clk_slave), .rst_n(rst_n),
    .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .product(product),
    .stage_error(stage_error), .error(error)
  );

  task automatic fail(input string what);
    failures++;
    $display("FAIL %0t: %s", $time, what);
  endtask

  // Bad values held by the forces below.
  logic [960:0] bad1;
  logic [320:0] bad2;
  logic [128:0] bad3;
  logic [97:0]  bad4;
  logic [64:0]  bad5;

  // Transient on the input of register k (1..5), data bit bit_i.
  task automatic force_input(input int k, input int bit_i);
    case (k)
      1: begin bad1 = dut.s1_d_buf ^ (961'(1) << bit_i); force dut.s1_d_buf = bad1; end
      2: begin bad2 = dut.s2_d_buf ^ (321'(1) << bit_i); force dut.s2_d_buf = bad2; end
      3: begin bad3 = dut.s3_d_buf ^ (129'(1) << bit_i); force dut.s3_d_buf = bad3; end
      4: begin bad4 = dut.s4_d_buf ^ (98'(1) << bit_i);  force dut.s4_d_buf = bad4; end
      default: begin bad5 = dut.s5_d_buf ^ (65'(1) << bit_i); force dut.s5_d_buf = bad5; end
    endcase
  endtask

  task automatic release_input(input int k);
    case (k)
      1: release dut.s1_d_buf;
      2: release dut.s2_d_buf;
      3: release dut.s3_d_buf;
      4: release dut.s4_d_buf;
      default: release dut.s5_d_buf;
    endcase
  endtask

  // Single-event upset of a master flipflop of register k.
  task automatic upset_master(input int k, input int bit_i);
    case (k)
      1: begin bad1 = dut.u_r1.q ^ (961'(1) << bit_i); force dut.u_r1.q = bad1; #1 release dut.u_r1.q; end
      2: begin bad2 = dut.u_r2.q ^ (321'(1) << bit_i); force dut.u_r2.q = bad2; #1 release dut.u_r2.q; end
      3: begin bad3 = dut.u_r3.q ^ (129'(1) << bit_i); force dut.u_r3.q = bad3; #1 release dut.u_r3.q; end
      4: begin bad4 = dut.u_r4.q ^ (98'(1) << bit_i);  force dut.u_r4.q = bad4; #1 release dut.u_r4.q; end
      default: begin bad5 = dut.u_r5.q ^ (65'(1) << bit_i); force dut.u_r5.q = bad5; #1 release dut.u_r5.q; end
    endcase
  endtask

  function automatic int data_bits(input int k);
    case (k)
      1: return 960;
      2: return 320;
      3: return 128;
      4: return 97;
      default: return 64;
    endcase
  endfunction

  task automatic new_operands(input int n);
    in_valid = ($urandom % 5) != 0;
    a = $urandom;
    b = $urandom;
    if (n % 97 == 3) begin a = '1; b = '1; end
    op_valid[n] = in_valid;
    op_prod[n]  = (2*W)'(a) * (2*W)'(b);
    op_taint[n] = 1'b0;
  endtask

  initial begin
    #(64'd4580 * 64'(NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   prev_valid;
    // A falling edge on rst_n, whatever its start value.
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    for (int n = 0; n < NCYC + 8; n++) begin
      op_valid[n] = 1'b0; op_prod[n] = '0; op_taint[n] = 1'b0;
    end
    new_operands(1);                         // captured at edge 1 (2290 ps)
    #999;
    checks++;
    if (out_valid !== 1'b0 || product !== '0 || error !== 1'b0) fail("reset state");
    else n_reset++;
    #500 rst_n = 1'b1;
    #800;                                    // edge 1 + 10
    new_operands(2);
    #2280;                                   // falling edge after edge 1
    prev_valid = 0;
    // Loop iteration n: from the falling edge before master edge n to the
    // falling edge after it.
    for (int n = 2; n < NCYC; n++) begin
      inj_e inj;
      int   k, bit_i, r;
      logic [4:0] exp_se;
      r = $urandom % 9;
      inj   = (r < 6) ? NONE : (r == 6) ? TRANSIENT : (r == 7) ? UPSET : LONG;
      if (r == 8 && ($urandom % 2) == 0) inj = NONE;
      k     = 1 + ($urandom % 5);
      bit_i = $urandom % data_bits(k);
      // One fault per operation, so that two flips cannot cancel.
      if (n - (k - 1) < 1 || op_taint[n - (k - 1)]) inj = NONE;
      exp_se = (inj == TRANSIENT || inj == UPSET) ? 5'(1 << (k - 1)) : 5'd0;
      if (inj != NONE) op_taint[n - (k - 1)] = 1'b1;

      #2190;                                 // edge - 100
      if (inj == TRANSIENT || inj == LONG) force_input(k, bit_i);
      #110;                                  // edge + 10: upstream flipflops switch
      new_operands(n + 1);
      #290;                                  // edge + 300
      if (inj == TRANSIENT) release_input(k);
      #400;                                  // edge + 700
      if (inj == LONG) release_input(k);
      #300;                                  // edge + 1000
      if (inj == UPSET) begin
        upset_master(k, bit_i);
        #1289;
      end else begin
        #1290;                               // falling edge
      end

      // Error flags of the registers loaded at edge n.
      checks++;
      if (stage_error !== exp_se || error !== (exp_se != 0))
        fail($sformatf("edge %0d inj=%s stage %0d: stage_error=%b exp=%b error=%b",
                       n, inj.name(), k, stage_error, exp_se, error));
      else if (inj == TRANSIENT) n_transient[k-1]++;
      else if (inj == UPSET)     n_upset[k-1]++;
      else if (inj == LONG)      n_long[k-1]++;

      // Result of the operation captured at edge n - 4: five cycles after it
      // was applied.
      if (n - 4 >= 1) begin
        int m;
        m = n - 4;
        checks++;
        if (out_valid !== op_valid[m]) fail($sformatf("out_valid for op %0d", m));
        if (op_valid[m]) begin
          checks++;
          if (op_taint[m]) begin
            if (product === op_prod[m]) fail($sformatf("corrupted op %0d gave right product", m));
            else n_wrong_flagged++;
          end else if (product !== op_prod[m]) begin
            fail($sformatf("op %0d product=%h exp=%h", m, product, op_prod[m]));
          end else begin
            n_products++;
            if (prev_valid != 0) n_back_to_back++;
          end
        end else begin
          n_bubbles++;
        end
        prev_valid = int'(op_valid[m]);
      end
    end

    // Reset during operation clears every register and both copies.
    #100 rst_n = 1'b0;
    #10;
    checks++;
    if (out_valid !== 1'b0 || product !== '0 || stage_error !== '0) fail("reset in operation");
    else n_reset++;

    $display("products=%0d back_to_back=%0d bubbles=%0d corrupted_results=%0d resets=%0d",
             n_products, n_back_to_back, n_bubbles, n_wrong_flagged, n_reset);
    for (int s = 0; s < 5; s++)
      $display("stage %0d: transients detected=%0d upsets detected=%0d long pulses missed=%0d",
               s + 1, n_transient[s], n_upset[s], n_long[s]);
    checks++;
    if (n_products == 0 || n_back_to_back == 0 || n_bubbles == 0 || n_reset != 2)
      fail("a pipeline mechanism never happened");
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (n_transient[s] == 0 || n_upset[s] == 0 || n_long[s] == 0)
        fail($sformatf("a fault kind never happened in stage %0d", s + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
