// tb_ora_sisr: serial signature register test.
// Reference: the signature is the bit stream divided by the feedback
// polynomial, computed here as a shift of a W-bit integer with the feedback
// bits XORed into bit 0. Also checks hold with en = 0, clear, and that a
// single flipped bit in a stream changes the signature.
module tb_ora_sisr;

  localparam int unsigned W = 4;
  logic         clk = 1'b0;
  logic         rst, clr, en, si;
  logic [W-1:0] sig;
  int           checks = 0, failures = 0;

  ora_sisr #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: integer register, bit i = stage i.
  function automatic int unsigned ref_step(int unsigned r, bit b);
    bit fb;
    fb = b ^ r[W-1] ^ r[W-2];
    return ((r << 1) | 32'(fb)) & ((1 << W) - 1);
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(input bit stream [], output logic [W-1:0] result);
    clr = 1'b1; en = 1'b0;
    @(posedge clk);
    #1 clr = 1'b0;
    foreach (stream[i]) begin
      si = stream[i];
      en = 1'b1;
      @(posedge clk);
      #1;
    end
    en = 1'b0;
    result = sig;
  endtask

  initial begin
    int unsigned r;
    bit stream [];
    logic [W-1:0] s_good, s_bad;
    rst = 1'b1; clr = 1'b0; en = 1'b0; si = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    check(sig == '0, "reset clears");
    r = 0;
    for (int i = 0; i < 100; i++) begin
      si = 1'($urandom);
      en = ($urandom % 3) != 0;
      if (en) r = ref_step(r, si);
      @(posedge clk);
      #1 check(sig == W'(r), $sformatf("cycle %0d: sig=%h expected %h", i, sig, r));
    end
    // single-bit error detection
    for (int n = 0; n < 10; n++) begin
      int flip;
      stream = new[20];
      foreach (stream[i]) stream[i] = 1'($urandom);
      run_stream(stream, s_good);
      flip = $urandom % 20;
      stream[flip] = !stream[flip];
      run_stream(stream, s_bad);
      check(s_good != s_bad, "single-bit error must change the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
