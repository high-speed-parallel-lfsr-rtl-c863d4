// signature_comparator: good/faulty decision at the end of a test.
//
// On a `check` edge it compares the analyser signature `sig` with the
// expected fault-free signature `golden` and registers the verdict:
// `fault` = 1 when they differ, and sets `valid`. `clr` (synchronous) drops
// both, e.g. when a new test starts. The verdict is a flip-flop output, so it
// reaches the pin one clock-to-output delay after the check edge.
//
// Comparing against a stored signature follows the document; the registered
// verdict and the clear input are this design's choices.
module signature_comparator #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         check,
  input  logic [W-1:0] sig,
  input  logic [W-1:0] golden,
  output logic         fault,
  output logic         valid
);

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      fault <= 1'b0;
      valid <= 1'b0;
    end else if (check) begin
      fault <= (sig != golden);
      valid <= 1'b1;
    end
  end

endmodule
