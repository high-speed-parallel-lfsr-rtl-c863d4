// tb_signature_comparator: random signatures, equal and unequal to the
// expected one; the verdict must appear only after a check edge and clear
// with clr.
module tb_signature_comparator;

  localparam int unsigned W = 4;
  logic         clk = 1'b0;
  logic         rst, clr, check;
  logic [W-1:0] sig, golden;
  logic         fault, valid;
  int           checks = 0, failures = 0, n_good = 0, n_bad = 0;

  signature_comparator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_ok(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clr = 1'b0; check = 1'b0; sig = '0; golden = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    expect_ok(!valid && !fault, "reset clears verdict");
    for (int i = 0; i < 60; i++) begin
      golden = W'($urandom);
      sig    = (($urandom % 2) != 0) ? golden : W'($urandom);
      @(posedge clk);
      #1 expect_ok(!valid, "no verdict before check");
      check = 1'b1;
      @(posedge clk);
      #1 check = 1'b0;
      expect_ok(valid, "valid after check");
      expect_ok(fault == (sig != golden), $sformatf("sig=%h golden=%h fault=%b", sig, golden, fault));
      if (sig == golden) n_good++; else n_bad++;
      sig = ~sig;   // later changes must not alter the stored verdict
      @(posedge clk);
      #1 expect_ok(fault == (~sig != golden), "verdict held");
      clr = 1'b1;
      @(posedge clk);
      #1 clr = 1'b0;
    end
    expect_ok(n_good > 0 && n_bad > 0, "both verdicts must occur");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
