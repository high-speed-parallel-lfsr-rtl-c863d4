// lt_bist: low-transition stage of the pattern generator.
//
// A K-input AND gate combines K outputs of the bit-swapping LFSR; a toggle
// flip-flop flips whenever the AND output is 1 on an enabled clock edge. The
// toggle flip-flop output is the scan-in bit. Because a K-input AND is 1 only
// in about one cycle of 2^K, the scan input changes rarely, so adjacent scan
// cells mostly receive equal values and shifting causes few transitions.
//
// Interface: `a` are the AND inputs, `en` advances the toggle flip-flop,
// `rst` (synchronous) clears it. `t_q` is the registered scan-in bit,
// `and_out` the combinational AND output, `toggle` = en & and_out.
//
// The AND gate feeding a toggle flip-flop follows the document. K = 2, with
// the two swapped LFSR bits as inputs, follows its pattern-generator diagram;
// the reset value 0 is this design's choice.
module lt_bist #(
  parameter int unsigned K = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [K-1:0] a,
  output logic         and_out,
  output logic         toggle,
  output logic         t_q
);

  assign and_out = &a;
  assign toggle  = en & and_out;

  always_ff @(posedge clk) begin
    if (rst)         t_q <= 1'b0;
    else if (toggle) t_q <= ~t_q;
  end

endmodule
