// tb_bs_lfsr: self-checking test of the bit-swapping LFSR.
//
// The reference is the sequence recurrence s(t+1) = s(t) ^ s(t-3) of the
// bit entering stage 0, kept as a history array, so stage k at time t is
// s(t-k). Checks every cycle: the raw stages, the swap flag (set when the
// last stage is 0), the two multiplexer outputs (swapped when the last stage
// is 0, straight otherwise), the untouched upper bits, that the seed 1010
// comes back after exactly 15 steps with 15 distinct states in between, and
// that `en` = 0 holds the register.
module tb_bs_lfsr;

  logic       clk = 1'b0;
  logic       rst, en;
  logic [3:0] init, q, lfsr_out;
  logic       swap;
  int         checks = 0, failures = 0;
  int         hist [$];
  int         n_swap = 0, n_straight = 0;
  bit         seen [16];

  bs_lfsr #(.N(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_q;
    init = 4'b1010;
    rst  = 1'b1;
    en   = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    // history, newest first: stage k now holds hist[k]
    hist = '{int'(init[0]), int'(init[1]), int'(init[2]), int'(init[3])};
    en = 1'b1;
    for (int t = 0; t < 32; t++) begin
      for (int k = 0; k < 4; k++) exp_q[k] = hist[k][0];
      check(q == exp_q, $sformatf("step %0d: q=%b expected %b", t, q, exp_q));
      check(swap == !exp_q[3], $sformatf("step %0d: swap flag", t));
      if (exp_q[3]) begin
        n_straight++;
        check(lfsr_out[0] == exp_q[0] && lfsr_out[1] == exp_q[1], $sformatf("step %0d: straight", t));
      end else begin
        n_swap++;
        check(lfsr_out[0] == exp_q[1] && lfsr_out[1] == exp_q[0], $sformatf("step %0d: swapped", t));
      end
      check(lfsr_out[3:2] == exp_q[3:2], $sformatf("step %0d: upper bits", t));
      if (t < 15) begin
        check(!seen[q], $sformatf("state %b repeats before 15 steps", q));
        seen[q] = 1'b1;
      end
      if (t == 15) check(q == init, "seed not back after 15 steps");
      hist.push_front(hist[0] ^ hist[3]);
      @(posedge clk);
      #1;
    end
    // hold
    en = 1'b0;
    exp_q = q;
    repeat (3) @(posedge clk);
    #1 check(q == exp_q, "en=0 must hold the state");
    check(n_swap > 0 && n_straight > 0, "both multiplexer settings must occur");
    $display("swapped=%0d straight=%0d", n_swap, n_straight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
