// tb_lt_bs_bist_top: end-to-end test of the scan BIST at its default size
// (4-bit LFSR seeded 1010, 4-cidx chain, 16 low-transition and 16 weighted
// patterns).
//
// A software reference replays the whole test cycle by cycle: its own LFSR,
// toggle bit, weighted bit, scan chain positions, the s27 stand-in CUT and
// the signature register. It yields the scan-in stream and the final
// signature for the fault-free CUT and for each injected fault.
//
// Runs: (1) fault-free CUT with the fault-free signature as expectation:
// every shifted bit, the signature, the run length and fault = 0 are checked;
// (2) a CUT with a fault the reference says the signatures catch: fault = 1;
// (3) the fault-free CUT again, which must clear the verdict. Normal mode (CUT sees the system inputs) is
// also checked. Each mechanism must occur at least once: swapped and
// straight LFSR outputs, toggles, the switch from low-transition to weighted
// patterns, each of the three weights, captures, unload shifts, both
// verdicts and normal-mode isolation. It also checks that the low-transition
// patterns change the scan input less often than a plain LFSR bit would.
module tb_lt_bs_bist_top;
  import bist_pkg::*;
  import s27_tb_pkg::*;

  localparam int L = 4, N_LT = 16, N_WR = 16;
  localparam int CHAIN [L] = '{2, 0, 3, 1};   // FF3, FF1, FF4, FF2
  localparam int RUN_CYCLES = (N_LT + N_WR) * (L + 1) + L + 1;

  logic        clk = 1'b0;
  logic        rst, start;
  logic [3:0]  init, wr_sel, wr_reset, golden_sig, sys_in, cut_in, cut_resp;
  logic        scan_in, scan_out, test_mode, busy, done, fault, fault_valid;
  logic [3:0]  signature, lfsr_state, lfsr_out;
  ctrl_state_e ctrl_state;
  tpg_src_e    tpg_src;
  logic        swap, lt_and, lt_toggle, lt_q, wr_q;
  int          fsel;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_swap = 0, n_straight = 0, n_toggle = 0, n_switch = 0, n_capture = 0;
  int n_unload = 0, n_good = 0, n_faulty = 0, n_isolate = 0;
  int n_w [3];
  int lt_trans = 0, lfsr_trans = 0;

  lt_bs_bist_top dut (.*);
  cut_s27_model u_cut (.x(cut_in), .fsel(fsel), .y(cut_resp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] sisr_step(logic [3:0] s, bit b);
    return {s[2:0], b ^ s[3] ^ s[2]};
  endfunction

  // Reference of one whole run. Returns the signature; fills the shift-in
  // stream. q[k] is LFSR stage k; cells[k] is scan cidx FFk+1.
  function automatic logic [3:0] ref_run(input int f, output bit stream [$]);
    bit          q [4];
    bit          t, rq, w, bitv, out, nw, nrq;
    bit          phys [L];
    logic [3:0]  sig, x, y;
    int          pos_next, cidx;
    for (int k = 0; k < 4; k++) q[k] = init[k];
    t = 0; rq = q[3]; w = 0; sig = '0;
    foreach (phys[p]) phys[p] = 0;
    stream = {};
    // start cycle: only the weighted-cidx registers move
    cidx = CHAIN[L - 1];
    w  = (wr_sel[cidx] & ~wr_reset[cidx]) | (wr_sel[cidx] & rq) | (~wr_reset[cidx] & rq);
    rq = q[3];
    for (int p = 0; p < N_LT + N_WR; p++) begin
      for (int j = 0; j < L; j++) begin
        bitv = (p < N_LT) ? t : w;
        stream.push_back(bitv);
        out = phys[L-1];
        if (p > 0) sig = sisr_step(sig, out);
        pos_next = (j < L - 1) ? j + 1 : 0;
        cidx = CHAIN[L - 1 - pos_next];
        nw  = (wr_sel[cidx] & ~wr_reset[cidx]) | (wr_sel[cidx] & rq) | (~wr_reset[cidx] & rq);
        nrq = q[3];
        if (q[0] && q[1]) t = !t;
        begin
          bit fb;
          fb = q[0] ^ q[3];
          q[3] = q[2]; q[2] = q[1]; q[1] = q[0]; q[0] = fb;
        end
        for (int k = L - 1; k > 0; k--) phys[k] = phys[k-1];
        phys[0] = bitv;
        w = nw; rq = nrq;
      end
      // capture
      for (int k = 0; k < L; k++) x[CHAIN[k]] = phys[k];
      y = s27_resp(x, f);
      for (int k = 0; k < L; k++) phys[k] = y[CHAIN[k]];
      cidx = CHAIN[L - 1];
      w = (wr_sel[cidx] & ~wr_reset[cidx]) | (wr_sel[cidx] & rq) | (~wr_reset[cidx] & rq);
      rq = q[3];
    end
    for (int j = 0; j < L; j++) begin
      sig = sisr_step(sig, phys[L-1]);
      for (int k = L - 1; k > 0; k--) phys[k] = phys[k-1];
      phys[0] = 0;
    end
    return sig;
  endfunction

  // Runs the hardware once and checks it against the reference.
  task automatic hw_run(input int f, input logic [3:0] exp_sig, input bit [3:0] gold, input bit exp_fault);
    bit stream [$];
    int k, busy_cycles, lt_run;
    logic [3:0] s;
    tpg_src_e prev_src;
    void'(ref_run(f, stream));
    fsel = f;
    golden_sig = gold;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    k = 0; busy_cycles = 0; lt_run = 0;
    prev_src = tpg_src;
    while (!done && busy_cycles < 1000) begin
      busy_cycles++;
      if (ctrl_state == ST_SHIFT) begin
        check(k < stream.size() && scan_in == stream[k],
              $sformatf("shift %0d: scan_in=%b", k, scan_in));
        if (swap) n_swap++; else n_straight++;
        if (lt_toggle) n_toggle++;
        if (tpg_src == SRC_LT) begin
          if (k > 0 && scan_in != stream[k-1]) lt_run++;
        end else begin
          int cidx;
          cidx = CHAIN[L - 1 - (k % L)];
          if (wr_sel[cidx] && !wr_reset[cidx]) n_w[1]++;
          else if (!wr_sel[cidx] && wr_reset[cidx]) n_w[0]++;
          else n_w[2]++;
        end
        k++;
      end
      if (ctrl_state == ST_CAPTURE) n_capture++;
      if (ctrl_state == ST_UNLOAD) n_unload++;
      if (tpg_src != prev_src) n_switch++;
      prev_src = tpg_src;
      check(test_mode && cut_in == u_cut.x, "CUT driven by scan cells in test mode");
      @(posedge clk);
      #1;
    end
    check(k == (N_LT + N_WR) * L, $sformatf("%0d shift cycles", k));
    check(busy_cycles == RUN_CYCLES, $sformatf("run took %0d cycles, expected %0d", busy_cycles, RUN_CYCLES));
    check(signature == exp_sig, $sformatf("signature %h expected %h", signature, exp_sig));
    check(fault_valid && fault == exp_fault, $sformatf("verdict fault=%b expected %b", fault, exp_fault));
    check(lt_run < lfsr_trans, $sformatf("low-transition stream switched %0d times, plain LFSR bit %0d", lt_run, lfsr_trans));
    lt_trans = lt_run;
    if (fault_valid && !fault) n_good++;
    if (fault_valid && fault) n_faulty++;
  endtask

  initial begin
    bit stream [$];
    logic [3:0] sig_ok, sig_f;
    int det;
    det = -1;
    init = 4'b1010;
    wr_sel = 4'b0001;     // FF1 held at 1
    wr_reset = 4'b0100;   // FF3 held at 0, FF2 and FF4 random
    golden_sig = '0; sys_in = '0; start = 1'b0; fsel = 0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;
    // normal mode: system inputs reach the CUT
    for (int i = 0; i < 8; i++) begin
      sys_in = 4'($urandom);
      #1 check(!test_mode && cut_in == sys_in, "normal mode passes system inputs");
      n_isolate++;
    end
    // plain-LFSR transitions over the same number of shifts, for comparison
    begin
      bit q [4], prev;
      for (int k = 0; k < 4; k++) q[k] = init[k];
      prev = q[3];
      for (int i = 0; i < N_LT * L; i++) begin
        bit fb;
        if (q[3] != prev) lfsr_trans++;
        prev = q[3];
        fb = q[0] ^ q[3];
        q[3] = q[2]; q[2] = q[1]; q[1] = q[0]; q[0] = fb;
      end
    end
    sig_ok = ref_run(0, stream);
    // run 1: fault-free
    hw_run(0, sig_ok, sig_ok, 1'b0);
    // pick a fault the signature catches
    for (int f = 1; f <= 6 && det < 0; f++) begin
      sig_f = ref_run(f, stream);
      if (sig_f != sig_ok) det = f;
    end
    check(det > 0, "no injected fault changes the signature");
    // run 2: faulty CUT, after a reset so that the seed is reloaded
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;
    if (det > 0) hw_run(det, ref_run(det, stream), sig_ok, 1'b1);
    // run 3: fault-free again after the faulty run: the verdict must clear
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;
    hw_run(0, sig_ok, sig_ok, 1'b0);
    $display("swap=%0d straight=%0d toggles=%0d switches=%0d w0=%0d w1=%0d wrand=%0d captures=%0d unload=%0d good=%0d faulty=%0d fault=%0d",
             n_swap, n_straight, n_toggle, n_switch, n_w[0], n_w[1], n_w[2], n_capture, n_unload, n_good, n_faulty, det);
    $display("scan-in transitions over %0d low-transition shifts: %0d (plain LFSR bit: %0d)",
             N_LT * L, lt_trans, lfsr_trans);
    check(n_swap > 0, "swap never happened");
    check(n_straight > 0, "straight never happened");
    check(n_toggle > 0, "toggle never happened");
    check(n_switch > 0, "LT to weighted switch never happened");
    check(n_w[0] > 0 && n_w[1] > 0 && n_w[2] > 0, "a weight was never applied");
    check(n_capture > 0 && n_unload > 0, "capture/unload never happened");
    check(n_good > 0 && n_faulty > 0, "both verdicts must occur");
    check(n_isolate > 0, "normal mode never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
