// lt_bs_bist_top: low-transition scan BIST built around a bit-swapping LFSR.
//
// Data path: bist_tpg (bit-swapping LFSR -> low-transition AND/toggle stage,
// and -> adder-based 3-weight cell; a multiplexer picks one) feeds the scan-in
// of a reordered scan chain. In test mode the scan cells drive the circuit
// under test (CUT) through the input isolation multiplexer, capture its
// response, and shift it out into a serial signature register. At the end the
// signature is compared with the expected one and `fault` reports the verdict.
//
// The CUT and the memory holding the expected signature are outside this
// module: `cut_in` goes to the CUT, `cut_resp` comes back (cut_resp[k] is
// captured into scan cell k), `golden_sig` is the expected signature. The
// weights of the second phase come in per scan cell: wr_sel[k] = 1 holds
// cell k at 1, wr_reset[k] = 1 holds it at 0, neither (or both) leaves it
// random.
//
// Timing: pulse `start` for one cycle; `busy` is high for
// (N_LT + N_WR) * (L + 1) + L + 1 cycles (165 at the defaults); then `done`
// stays high, with `fault`
// valid until the next start. `rst` is synchronous and loads the LFSR seed
// `init` (1010 in the document's example).
//
// The generator structure, the two test phases, the four-cell s27 scan chain
// and its order come from the document; the controller protocol, signature
// register, pattern counts and port encoding are this design's choices.
module lt_bs_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N     = LFSR_LEN_DEF,
  parameter int unsigned K     = 2,
  parameter int unsigned L     = SCAN_LEN_DEF,
  parameter int unsigned W     = 4,
  parameter int unsigned N_LT  = 16,
  parameter int unsigned N_WR  = 16,
  parameter int unsigned ORDER [L] = SCAN_ORDER_DEF
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [N-1:0] init,
  input  logic [L-1:0] wr_sel,
  input  logic [L-1:0] wr_reset,
  input  logic [W-1:0] golden_sig,
  input  logic [L-1:0] sys_in,
  output logic [L-1:0] cut_in,
  input  logic [L-1:0] cut_resp,
  output logic         scan_in,
  output logic         scan_out,
  output logic [W-1:0] signature,
  output logic         test_mode,
  output logic         busy,
  output logic         done,
  output logic         fault,
  output logic         fault_valid,
  // observation of internal state
  output ctrl_state_e  ctrl_state,
  output tpg_src_e     tpg_src,
  output logic [N-1:0] lfsr_state,
  output logic [N-1:0] lfsr_out,
  output logic         swap,
  output logic         lt_and,
  output logic         lt_toggle,
  output logic         lt_q,
  output logic         wr_q
);

  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;

  logic          tpg_en, scan_en, capture, ora_clr, ora_en, cmp_clr, check;
  logic [CW-1:0] wr_cell;
  logic [L-1:0]  scan_q;

  test_controller #(
    .L(L), .N_LT(N_LT), .N_WR(N_WR), .ORDER(ORDER)
  ) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .start     (start),
    .state     (ctrl_state),
    .src       (tpg_src),
    .tpg_en    (tpg_en),
    .wr_cell   (wr_cell),
    .scan_en   (scan_en),
    .capture   (capture),
    .ora_clr   (ora_clr),
    .ora_en    (ora_en),
    .cmp_clr   (cmp_clr),
    .check     (check),
    .test_mode (test_mode),
    .busy      (busy),
    .done      (done)
  );

  bist_tpg #(.N(N), .K(K)) u_tpg (
    .clk       (clk),
    .rst       (rst),
    .en        (tpg_en),
    .init      (init),
    .src       (tpg_src),
    .wr_sel    (wr_sel[wr_cell]),
    .wr_reset  (wr_reset[wr_cell]),
    .scan_in   (scan_in),
    .lfsr_q    (lfsr_state),
    .lfsr_out  (lfsr_out),
    .swap      (swap),
    .lt_and    (lt_and),
    .lt_toggle (lt_toggle),
    .lt_q      (lt_q),
    .wr_q      (wr_q)
  );

  scan_chain #(.L(L), .ORDER(ORDER)) u_scan (
    .clk      (clk),
    .rst      (rst),
    .scan_en  (scan_en),
    .capture  (capture),
    .scan_in  (scan_in),
    .resp     (cut_resp),
    .q        (scan_q),
    .scan_out (scan_out)
  );

  input_isolation #(.W(L)) u_iso (
    .test_mode (test_mode),
    .sys_in    (sys_in),
    .test_in   (scan_q),
    .cut_in    (cut_in)
  );

  ora_sisr #(.W(W)) u_ora (
    .clk (clk),
    .rst (rst),
    .clr (ora_clr),
    .en  (ora_en),
    .si  (scan_out),
    .sig (signature)
  );

  signature_comparator #(.W(W)) u_cmp (
    .clk    (clk),
    .rst    (rst),
    .clr    (cmp_clr),
    .check  (check),
    .sig    (signature),
    .golden (golden_sig),
    .fault  (fault),
    .valid  (fault_valid)
  );

endmodule
