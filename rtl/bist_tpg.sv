// bist_tpg: the proposed test pattern generator.
//
// A bit-swapping LFSR drives two generators. The low-transition generator
// (lt_bist) ANDs the K low swapped outputs O1, O2 and toggles a flip-flop;
// the adder-based 3-weight generator (a3wr_bist) weights the last LFSR stage
// Cn per scan position. A 2:1 multiplexer picks the scan-in bit: `src` =
// SRC_LT in the first part of the test (easy-to-detect faults), SRC_WR in the
// second (faults left by the first part).
//
// Interface: `en` advances the LFSR and the toggle flip-flop by one step (one
// per shift cycle); the weighted cell runs every cycle and expects the weight
// controls `wr_sel`/`wr_reset` one cycle before its bit is used. `scan_in`
// is combinational from registers. Remaining outputs expose internal state
// for observation.
//
// Which generators exist, the AND/toggle structure, the parts of the weighted
// cell and the source multiplexer follow the document; feeding the weighted
// cell from Cn follows its diagram; the rest is this design's choice.
module bist_tpg
  import bist_pkg::*;
#(
  parameter int unsigned N = LFSR_LEN_DEF,
  parameter int unsigned K = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] init,
  input  tpg_src_e     src,
  input  logic         wr_sel,
  input  logic         wr_reset,
  output logic         scan_in,
  output logic [N-1:0] lfsr_q,
  output logic [N-1:0] lfsr_out,
  output logic         swap,
  output logic         lt_and,
  output logic         lt_toggle,
  output logic         lt_q,
  output logic         wr_q
);

  bs_lfsr #(.N(N)) u_bs_lfsr (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .init     (init),
    .q        (lfsr_q),
    .lfsr_out (lfsr_out),
    .swap     (swap)
  );

  lt_bist #(.K(K)) u_lt_bist (
    .clk     (clk),
    .rst     (rst),
    .en      (en),
    .a       (lfsr_out[K-1:0]),
    .and_out (lt_and),
    .toggle  (lt_toggle),
    .t_q     (lt_q)
  );

  a3wr_bist u_a3wr_bist (
    .clk     (clk),
    .rst     (rst),
    .rnd     (lfsr_q[N-1]),
    .sel_i   (wr_sel),
    .reset_i (wr_reset),
    .w_q     (wr_q)
  );

  assign scan_in = (src == SRC_WR) ? wr_q : lt_q;

  initial begin
    assert (K >= 1 && K <= N) else $error("bist_tpg: K must be between 1 and N");
  end

endmodule
