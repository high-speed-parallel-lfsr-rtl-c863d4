// tb_bist_tpg: self-checking test of the complete pattern generator.
//
// Random advance enables, source selects and weight controls every cycle.
// The reference keeps its own LFSR history (recurrence s(t+1) = s(t) ^
// s(t-3)), its own toggle bit (flips when both swapped outputs are 1 on an
// advancing edge) and its own weighted bit (1 / 0 / the random bit sampled
// the cycle before, from the controls of the previous cycle), and checks the
// multiplexed scan-in bit. Counts swaps, toggles, both sources and all weights.
module tb_bist_tpg;
  import bist_pkg::*;

  logic       clk = 1'b0;
  logic       rst, en;
  logic [3:0] init, lfsr_q, lfsr_out;
  tpg_src_e   src;
  logic       wr_sel, wr_reset, scan_in, swap, lt_and, lt_toggle, lt_q, wr_q;
  int         checks = 0, failures = 0;
  int         n_swap = 0, n_tog = 0, n_lt = 0, n_wr = 0;
  int         n_w [3];

  bist_tpg #(.N(4), .K(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h [$];        // h[k] = stage k (0 or 1)
    bit t, rq, w, o1, o2, exp_bit;
    init = 4'b1010;
    rst = 1'b1; en = 1'b0; src = SRC_LT; wr_sel = 1'b0; wr_reset = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    h = '{int'(init[0]), int'(init[1]), int'(init[2]), int'(init[3])};
    t = 1'b0; rq = 1'b0; w = 1'b0;
    for (int i = 0; i < 400; i++) begin
      en       = ($urandom % 4) != 0;
      src      = tpg_src_e'($urandom % 2);
      wr_sel   = 1'($urandom);
      wr_reset = 1'($urandom);
      #1;
      o1 = (h[3] != 0) ? h[0][0] : h[1][0];
      o2 = (h[3] != 0) ? h[1][0] : h[0][0];
      exp_bit = (src == SRC_WR) ? w : t;
      check(scan_in == exp_bit, $sformatf("cycle %0d: scan_in=%b expected %b", i, scan_in, exp_bit));
      check(lfsr_out[1:0] == {o2, o1}, $sformatf("cycle %0d: swapped outputs", i));
      check(lt_toggle == (en && o1 && o2), $sformatf("cycle %0d: toggle", i));
      if (h[3] == 0) n_swap++;
      if (src == SRC_WR) n_wr++; else n_lt++;
      // next state
      if (wr_sel && !wr_reset)      begin w = 1'b1; n_w[1]++; end
      else if (!wr_sel && wr_reset) begin w = 1'b0; n_w[0]++; end
      else                          begin w = rq;   n_w[2]++; end
      rq = h[3][0];
      if (en) begin
        if (o1 && o2) begin
          t = !t;
          n_tog++;
        end
        h.push_front(h[0] ^ h[3]);
        void'(h.pop_back());
      end
      @(posedge clk);
      #1;
    end
    check(n_swap > 0 && n_tog > 0 && n_lt > 0 && n_wr > 0, "mechanism coverage");
    check(n_w[0] > 0 && n_w[1] > 0 && n_w[2] > 0, "weight coverage");
    $display("swaps=%0d toggles=%0d lt=%0d wr=%0d w0=%0d w1=%0d wr=%0d",
             n_swap, n_tog, n_lt, n_wr, n_w[0], n_w[1], n_w[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
