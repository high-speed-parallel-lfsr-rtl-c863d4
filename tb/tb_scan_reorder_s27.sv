// tb_scan_reorder_s27: the s27 scan vectors through two scan chains.
//
// The four deterministic s27 test vectors V1..V4 and their responses R1..R4
// (cells FF1..FF4) are applied to two scan chains in lock step: one stitched
// in the natural order FF1-FF2-FF3-FF4, one in the transition-minimising
// order FF3-FF1-FF4-FF2. For each vector: 4 shift cycles, then capture of
// its response, whose unload overlaps the next vector's shift-in; a final
// unload empties the chain. Checks that both chains apply every vector
// intact and unload every response intact, and that the reordered chain's
// flip-flops toggle less in total during shifting.
//
//          FF1 FF2 FF3 FF4
//   V1      1   0   0   1      R1  0 1 0 0
//   V2      0   1   0   1      R2  0 0 1 0
//   V3      1   1   1   1      R3  1 0 1 1
//   V4      1   0   1   0      R4  1 0 0 1
module tb_scan_reorder_s27;

  localparam int unsigned L = 4;
  // vectors and responses, bit k = FF(k+1)
  localparam logic [L-1:0] V [4] = '{4'b1001, 4'b1010, 4'b1111, 4'b0101};
  localparam logic [L-1:0] R [4] = '{4'b0010, 4'b0100, 4'b1101, 4'b1001};
  localparam int unsigned NAT [L] = '{0, 1, 2, 3};
  localparam int unsigned OPT [L] = '{2, 0, 3, 1};

  logic         clk = 1'b0;
  logic         rst, scan_en, capture;
  logic         si_nat, si_opt, so_nat, so_opt;
  logic [L-1:0] resp, q_nat, q_opt;
  int           checks = 0, failures = 0;
  int           tog_nat = 0, tog_opt = 0;

  scan_chain #(.L(L), .ORDER(NAT)) u_nat (
    .clk(clk), .rst(rst), .scan_en(scan_en), .capture(capture), .scan_in(si_nat),
    .resp(resp), .q(q_nat), .scan_out(so_nat));
  scan_chain #(.L(L), .ORDER(OPT)) u_opt (
    .clk(clk), .rst(rst), .scan_en(scan_en), .capture(capture), .scan_in(si_opt),
    .resp(resp), .q(q_opt), .scan_out(so_opt));

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

  // one shift pass: shifts vector v in (zeros if none) and returns what came out
  task automatic shift_pass(input logic [L-1:0] v, input bit have_v,
                            output logic [L-1:0] out_nat, output logic [L-1:0] out_opt);
    logic [L-1:0] pn, po;
    scan_en = 1'b1;
    for (int j = 0; j < L; j++) begin
      // the bit shifted in at step j ends at chain position L-1-j
      si_nat = have_v ? v[NAT[L-1-j]] : 1'b0;
      si_opt = have_v ? v[OPT[L-1-j]] : 1'b0;
      out_nat[NAT[L-1-j]] = so_nat;
      out_opt[OPT[L-1-j]] = so_opt;
      pn = q_nat;
      po = q_opt;
      @(posedge clk);
      #1;
      tog_nat += $countones(q_nat ^ pn);
      tog_opt += $countones(q_opt ^ po);
    end
    scan_en = 1'b0;
  endtask

  initial begin
    logic [L-1:0] on, oo;
    rst = 1'b1; scan_en = 1'b0; capture = 1'b0; si_nat = 1'b0; si_opt = 1'b0; resp = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 4; i++) begin
      shift_pass(V[i], 1'b1, on, oo);
      if (i > 0) begin
        check(on == R[i-1], $sformatf("natural chain unloads R%0d as %b", i, on));
        check(oo == R[i-1], $sformatf("reordered chain unloads R%0d as %b", i, oo));
      end
      check(q_nat == V[i], $sformatf("natural chain applies V%0d as %b", i + 1, q_nat));
      check(q_opt == V[i], $sformatf("reordered chain applies V%0d as %b", i + 1, q_opt));
      resp = R[i];
      capture = 1'b1;
      @(posedge clk);
      #1 capture = 1'b0;
    end
    shift_pass('0, 1'b0, on, oo);
    check(on == R[3] && oo == R[3], "both chains unload R4");
    $display("flip-flop toggles while shifting: natural order %0d, reordered %0d", tog_nat, tog_opt);
    check(tog_opt < tog_nat, "reordered chain must toggle less");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
