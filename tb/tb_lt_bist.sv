// tb_lt_bist: self-checking test of the AND / toggle flip-flop stage.
// Random AND inputs and enables; the reference toggles a bit whenever all
// inputs are 1 on an enabled edge. Also checks the AND output and that the
// toggle flip-flop toggled at least once and held at least once.
module tb_lt_bist;

  localparam int unsigned K = 2;
  logic         clk = 1'b0;
  logic         rst, en;
  logic [K-1:0] a;
  logic         and_out, toggle, t_q;
  logic         ref_t;
  int           checks = 0, failures = 0, n_tog = 0, n_hold = 0;

  lt_bist #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; a = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    ref_t = 1'b0;
    for (int i = 0; i < 200; i++) begin
      a  = K'($urandom);
      en = ($urandom % 4) != 0;
      #1;
      check(and_out == (a == '1), "AND output");
      check(t_q == ref_t, $sformatf("cycle %0d: t_q=%b expected %b", i, t_q, ref_t));
      if (en && a == '1) begin
        ref_t = !ref_t;
        n_tog++;
      end else n_hold++;
      @(posedge clk);
      #1;
    end
    check(t_q == ref_t, "final state");
    check(n_tog > 0 && n_hold > 0, "toggle and hold must both occur");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
