// bs_lfsr: bit-swapping LFSR (BS-LFSR).
//
// A plain shift register Q0 -> Q1 -> ... -> Q(N-1) whose stage 0 is loaded with
// Q0 xor Q(N-1). For N = 4 this is x^4 + x^3 + 1, a maximal-length polynomial:
// the 15 non-zero states repeat with period 15. Two 2:1 multiplexers sit on
// stages 0 and 1 and are both steered by the last stage Cn = Q(N-1):
//   Cn = 0 : the two bits are swapped  (O1 = Q1, O2 = Q0)
//   Cn = 1 : the two bits pass as they are (O1 = Q0, O2 = Q1)
// The swap leaves the set of generated patterns unchanged but reorders bits so
// that fewer transitions reach the scan input.
//
// Interface: `rst` (synchronous, active high) loads the seed `init`; while
// `en` is high the register advances one step per rising clock edge.
// `lfsr_out` = {Q(N-1) .. Q2, O2, O1}; `q` is the raw register; `swap` is high
// in cycles where the multiplexers swap. Outputs are combinational from the
// register, so they change right after the clock edge that advances it.
//
// The stage count 4, the seed 1010, the XOR feeding stage 0 from Q0 and Q3,
// the swap rule and the multiplexer input numbering follow the document.
// The synchronous seed load and the enable are this design's choices.
module bs_lfsr #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] init,
  output logic [N-1:0] q,
  output logic [N-1:0] lfsr_out,
  output logic         swap
);

  logic cn;

  always_ff @(posedge clk) begin
    if (rst)     q <= init;
    else if (en) q <= {q[N-2:0], q[0] ^ q[N-1]};
  end

  assign cn   = q[N-1];
  assign swap = ~cn;

  always_comb begin
    lfsr_out = q;
    // MUX1: input 0 = Q1, input 1 = Q0; MUX2: input 0 = Q0, input 1 = Q1.
    lfsr_out[0] = cn ? q[0] : q[1];
    lfsr_out[1] = cn ? q[1] : q[0];
  end

  initial begin
    assert (N >= 3) else $error("bs_lfsr needs at least three stages");
  end

endmodule
