// scan_chain: reordered mux-D scan chain.
//
// L scan flip-flops, numbered by the CUT signal they serve (logical cells,
// FF1..FFL are indices 0..L-1). They are stitched in the order ORDER: the
// flip-flop next to scan-in is cell ORDER[0], the one driving scan-out is
// cell ORDER[L-1]. Choosing ORDER so that cells which usually hold equal
// values sit next to each other reduces the transitions during shifting.
//
// Interface and timing, per rising clock edge:
//   scan_en = 1 : shift one position toward scan-out, scan_in enters ORDER[0]
//   capture = 1 : (scan_en = 0) every cell k loads the CUT response resp[k]
//   otherwise   : hold
// `q[k]` is cell k, applied to CUT input k; `scan_out` is cell ORDER[L-1].
// `rst` (synchronous) clears all cells.
//
// Four cells for s27 and the transition counts that fix the order follow the
// document; the shift/capture encoding and reset are this design's choices.
module scan_chain
  import bist_pkg::*;
#(
  parameter int unsigned L = SCAN_LEN_DEF,
  parameter int unsigned ORDER [L] = SCAN_ORDER_DEF
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         scan_en,
  input  logic         capture,
  input  logic         scan_in,
  input  logic [L-1:0] resp,
  output logic [L-1:0] q,
  output logic         scan_out
);

  logic [L-1:0] shifted;

  // Shift path: each cell takes the value of its upstream neighbour.
  always_comb begin
    shifted = q;
    shifted[ORDER[0]] = scan_in;
    for (int p = 1; p < L; p++) begin
      shifted[ORDER[p]] = q[ORDER[p-1]];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)          q <= '0;
    else if (scan_en) q <= shifted;
    else if (capture) q <= resp;
  end

  assign scan_out = q[ORDER[L-1]];

endmodule
