// ora_sisr: output response analyser, a serial-input signature register.
//
// The scan-out stream is folded into a W-bit LFSR: on each enabled edge the
// register shifts toward its top bit and bit 0 takes
//   si ^ sig[W-1] ^ sig[W-2]
// (for W = 4 the characteristic polynomial x^4 + x^3 + 1). Any single wrong
// bit in the stream leaves a different signature. `clr` (synchronous, higher
// priority than `en`) and `rst` zero the register.
//
// That responses are compacted into a signature follows the document; the
// serial signature register, its width and polynomial are this design's
// choice.
module ora_sisr #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         en,
  input  logic         si,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk) begin
    if (rst || clr) sig <= '0;
    else if (en)    sig <= {sig[W-2:0], si ^ sig[W-1] ^ sig[W-2]};
  end

  initial begin
    assert (W >= 2) else $error("ora_sisr needs at least two bits");
  end

endmodule
