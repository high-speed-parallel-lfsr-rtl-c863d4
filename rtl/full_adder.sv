// full_adder: one-bit full adder, sum = a ^ b ^ ci, co = majority(a, b, ci).
// Used by the 3-weight random pattern cell, which takes only the carry; the
// sum is kept so that the cell is a plain full adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);

endmodule
