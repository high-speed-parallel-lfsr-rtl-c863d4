// tb_bs_lfsr_switching: switching activity of the bit-swapping LFSR over one
// full period, against the plain LFSR it is built from.
//
// Seeded with 1010, the register runs 15 steps (one period of x^4 + x^3 + 1).
// Checks that:
//   - the swapped outputs produce the same 15 four-bit patterns as the plain
//     register, only in a different order;
//   - the swapped bit O2 changes 4 times per period (cyclically) where the
//     plain stage Q1 changes 8 times, i.e. swapping halves its switching,
//     while O1 and Q0 both change 8 times.
// Expected counts come from working the sequence by hand:
//   Q3..Q0 from 1010: a 5 b 6 c 9 2 4 8 1 3 7 f e d (hex), period 15.
module tb_bs_lfsr_switching;

  logic       clk = 1'b0;
  logic       rst, en;
  logic [3:0] init, q, lfsr_out;
  logic       swap;
  int         checks = 0, failures = 0;
  logic [3:0] seq_q [15], seq_o [15];
  bit         set_q [16], set_o [16];

  bs_lfsr #(.N(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int cyc_transitions(input logic [3:0] s [15], input int b);
    int n = 0;
    for (int i = 0; i < 15; i++) if (s[i][b] != s[(i + 1) % 15][b]) n++;
    return n;
  endfunction

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam logic [3:0] HAND [15] = '{4'ha, 4'h5, 4'hb, 4'h6, 4'hc, 4'h9, 4'h2, 4'h4,
                                         4'h8, 4'h1, 4'h3, 4'h7, 4'hf, 4'he, 4'hd};
    init = 4'b1010; rst = 1'b1; en = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0; en = 1'b1;
    for (int t = 0; t < 15; t++) begin
      seq_q[t] = q;
      seq_o[t] = lfsr_out;
      check(q == HAND[t], $sformatf("step %0d: state %h, worked sequence gives %h", t, q, HAND[t]));
      set_q[q] = 1'b1;
      set_o[lfsr_out] = 1'b1;
      @(posedge clk);
      #1;
    end
    for (int v = 0; v < 16; v++)
      check(set_q[v] == set_o[v], $sformatf("pattern %h in one set only", v));
    check(!set_o[0], "all-zero pattern never occurs");
    $display("transitions per period: Q0 %0d O1 %0d | Q1 %0d O2 %0d",
             cyc_transitions(seq_q, 0), cyc_transitions(seq_o, 0),
             cyc_transitions(seq_q, 1), cyc_transitions(seq_o, 1));
    check(cyc_transitions(seq_q, 1) == 8, "Q1 switches 8 times");
    check(cyc_transitions(seq_o, 1) == 4, "O2 switches 4 times");
    check(cyc_transitions(seq_q, 0) == 8 && cyc_transitions(seq_o, 0) == 8, "Q0 and O1 switch 8 times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
