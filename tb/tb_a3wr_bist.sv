// tb_a3wr_bist: self-checking test of the 3-weight random pattern cell.
// Drives random weight controls and random bits. The reference: the output
// in cycle t+1 is 1 when sel_i = 1 and reset_i = 0 in cycle t, 0 when
// sel_i = 0 and reset_i = 1, and otherwise the random bit of cycle t-1.
// Counts that each weight occurred.
module tb_a3wr_bist;

  logic clk = 1'b0;
  logic rst, rnd, sel_i, reset_i, w_q;
  logic rnd_d1, exp_w;
  int   checks = 0, failures = 0;
  int   n_w [3];

  a3wr_bist dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (600) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rnd = 1'b0; sel_i = 1'b0; reset_i = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    check(w_q == 1'b0, "reset clears output");
    rnd_d1 = 1'b0;   // random register after reset
    for (int i = 0; i < 400; i++) begin
      rnd     = 1'($urandom);
      sel_i   = 1'($urandom);
      reset_i = 1'($urandom);
      if (sel_i && !reset_i)      begin exp_w = 1'b1;   n_w[1]++; end
      else if (!sel_i && reset_i) begin exp_w = 1'b0;   n_w[0]++; end
      else                        begin exp_w = rnd_d1; n_w[2]++; end
      rnd_d1 = rnd;
      @(posedge clk);
      #1 check(w_q == exp_w, $sformatf("cycle %0d: w_q=%b expected %b", i, w_q, exp_w));
    end
    check(n_w[0] > 0 && n_w[1] > 0 && n_w[2] > 0, "all three weights must occur");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
