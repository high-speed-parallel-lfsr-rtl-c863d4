// a3wr_bist: adder-based 3-weight random pattern cell (A3WRBIST).
//
// One full adder and two D flip-flops. The first flip-flop samples a
// pseudo-random bit from the LFSR; the full adder receives it as carry-in,
// together with the weight controls sel_i (SEL[i]) and the inverse of
// reset_i (RESET[i]); the second flip-flop registers the carry-out, which is
// the weighted scan-in bit:
//   sel_i = 1, reset_i = 0 : carry = maj(1, 1, r) = 1      weight 1
//   sel_i = 0, reset_i = 1 : carry = maj(0, 0, r) = 0      weight 0
//   otherwise              : carry = maj(x, ~x, r) = r     weight 1/2
// so each scan position i can be held at 0, at 1, or left random. This
// targets the random-pattern-resistant faults the low-transition patterns miss.
//
// Timing: the weight controls present in cycle t and the random bit sampled
// at the edge ending cycle t-1 produce `w_q` in cycle t+1. Both flip-flops
// are cleared by the synchronous `rst`.
//
// The parts list (one full adder, two D flip-flops) and the SEL[i], RESET[i]
// and Cout names follow the document; how they are wired into three weights
// is this design's own reading.
module a3wr_bist (
  input  logic clk,
  input  logic rst,
  input  logic rnd,
  input  logic sel_i,
  input  logic reset_i,
  output logic w_q
);

  logic rnd_q;
  logic sum_unused;
  logic cout;

  always_ff @(posedge clk) begin
    if (rst) begin
      rnd_q <= 1'b0;
      w_q   <= 1'b0;
    end else begin
      rnd_q <= rnd;
      w_q   <= cout;
    end
  end

  full_adder u_fa (
    .a  (sel_i),
    .b  (~reset_i),
    .ci (rnd_q),
    .s  (sum_unused),
    .co (cout)
  );

endmodule
