// tb_scan_chain: reordered scan chain test at the default order
// FF3-FF1-FF4-FF2 (cells 2, 0, 3, 1 from scan-in to scan-out).
// Checks that a pattern shifted in for L cycles lands with its first bit in
// FF2 and its last bit in FF3, that scan-out walks through the cells in chain
// order, that capture loads every cell from its own response bit, and that
// the chain holds when neither shift nor capture is asserted. Random
// operations are also compared against a position-array model.
module tb_scan_chain;

  localparam int unsigned L = 4;
  logic         clk = 1'b0;
  logic         rst, scan_en, capture, scan_in, scan_out;
  logic [L-1:0] resp, q;
  int           checks = 0, failures = 0;
  // model: phys[p] is the flip-flop at chain position p; its logical cell
  // number per the reordered chain.
  localparam int CHAIN [L] = '{2, 0, 3, 1};
  bit           phys [L];

  scan_chain #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [L-1:0] model_q();
    logic [L-1:0] r;
    for (int p = 0; p < L; p++) r[CHAIN[p]] = phys[p];
    return r;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] pat;
    rst = 1'b1; scan_en = 1'b0; capture = 1'b0; scan_in = 1'b0; resp = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    check(q == '0, "reset clears");
    // directed: shift 1,0,0,0 -> first bit ends in FF2 (index 1)
    scan_en = 1'b1;
    for (int j = 0; j < L; j++) begin
      scan_in = (j == 0);
      @(posedge clk);
      #1;
    end
    scan_en = 1'b0;
    check(q == 4'b0010, $sformatf("first shifted bit must land in FF2, q=%b", q));
    // directed: capture, then unload order FF2, FF4, FF1, FF3
    resp = 4'b0101;   // FF1=1, FF3=1
    capture = 1'b1;
    @(posedge clk);
    #1 capture = 1'b0;
    check(q == 4'b0101, "capture loads responses");
    scan_en = 1'b1; scan_in = 1'b0;
    pat = '0;
    for (int j = 0; j < L; j++) begin
      pat[j] = scan_out;
      @(posedge clk);
      #1;
    end
    scan_en = 1'b0;
    check(pat == 4'b1100, $sformatf("unload order FF2,FF4,FF1,FF3 gives %b", pat));
    // random against model
    foreach (phys[p]) phys[p] = 1'b0;
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      int op;
      op      = $urandom % 3;
      scan_en = (op == 0);
      capture = (op == 1);
      scan_in = 1'($urandom);
      resp    = L'($urandom);
      #1 check(scan_out == phys[L-1], "scan_out is last chain position");
      if (op == 0) begin
        for (int p = L - 1; p > 0; p--) phys[p] = phys[p-1];
        phys[0] = scan_in;
      end else if (op == 1) begin
        for (int p = 0; p < L; p++) phys[p] = resp[CHAIN[p]];
      end
      @(posedge clk);
      #1 check(q == model_q(), $sformatf("op %0d: q=%b expected %b", op, q, model_q()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
