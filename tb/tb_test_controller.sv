// tb_test_controller: cycle-by-cycle check of the test sequence with 3
// low-transition and 2 weighted patterns on a 4-cell chain.
// The expected schedule after start is (4 shifts, 1 capture) x 5, 4 unload
// shifts, 1 compare, then DONE: 30 cycles from start to the compare edge.
// Every cycle checks the state and all strobes, the source (weighted from
// the 4th pattern on), the analyser enable (off while the first pattern
// goes in) and the weight cell for the next bit (FF2, FF4, FF1, FF3 for shift
// positions 0..3). The run is done twice to check restart from DONE.
module tb_test_controller;
  import bist_pkg::*;

  localparam int unsigned L = 4, N_LT = 3, N_WR = 2;
  localparam int CELL_OF_POS [L] = '{1, 3, 0, 2};
  logic        clk = 1'b0;
  logic        rst, start;
  ctrl_state_e state;
  tpg_src_e    src;
  logic        tpg_en, scan_en, capture, ora_clr, ora_en, cmp_clr, check;
  logic        test_mode, busy, done;
  logic [1:0]  wr_cell;
  int          checks = 0, failures = 0;

  test_controller #(.L(L), .N_LT(N_LT), .N_WR(N_WR)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_ok(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    int cyc;
    start = 1'b1;
    #1 expect_ok(ora_clr && cmp_clr, "clear strobes with start");
    expect_ok(wr_cell == 2'(CELL_OF_POS[0]), "weight cell before first shift");
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    for (int p = 0; p < N_LT + N_WR; p++) begin
      for (int j = 0; j < L; j++) begin
        expect_ok(state == ST_SHIFT && tpg_en && scan_en && !capture && test_mode && busy,
                  $sformatf("pattern %0d shift %0d strobes", p, j));
        expect_ok(src == ((p < N_LT) ? SRC_LT : SRC_WR), $sformatf("pattern %0d source", p));
        expect_ok(ora_en == (p != 0), $sformatf("pattern %0d analyser enable", p));
        expect_ok(wr_cell == 2'(CELL_OF_POS[(j + 1) % L]), $sformatf("shift %0d next weight cell %0d", j, wr_cell));
        @(posedge clk);
        #1 cyc++;
      end
      expect_ok(state == ST_CAPTURE && capture && !scan_en && !tpg_en && !ora_en,
                $sformatf("pattern %0d capture", p));
      expect_ok(wr_cell == 2'(CELL_OF_POS[0]), "weight cell during capture");
      @(posedge clk);
      #1 cyc++;
    end
    for (int j = 0; j < L; j++) begin
      expect_ok(state == ST_UNLOAD && scan_en && ora_en && !tpg_en, $sformatf("unload %0d", j));
      @(posedge clk);
      #1 cyc++;
    end
    expect_ok(state == ST_COMPARE && check && !done, "compare");
    @(posedge clk);
    #1 cyc++;
    expect_ok(cyc == (N_LT + N_WR) * (L + 1) + L + 1, $sformatf("run length %0d cycles", cyc));
    expect_ok(done && !busy && !test_mode && !check, "done");
    repeat (3) @(posedge clk);
    #1 expect_ok(done && state == ST_DONE, "done holds");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    expect_ok(state == ST_IDLE && !busy && !test_mode, "idle after reset");
    @(posedge clk);
    #1 expect_ok(state == ST_IDLE, "stays idle without start");
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
