// input_isolation: keeps system inputs out of the circuit under test while
// it is being tested.
//
// In test mode the CUT sees the scan cells; in normal mode it sees the system
// inputs. Purely combinational: cut_in = test_mode ? test_in : sys_in.
// The block's purpose follows the document; a plain 2:1 multiplexer per bit
// is this design's implementation.
module input_isolation #(
  parameter int unsigned W = 4
) (
  input  logic         test_mode,
  input  logic [W-1:0] sys_in,
  input  logic [W-1:0] test_in,
  output logic [W-1:0] cut_in
);

  assign cut_in = test_mode ? test_in : sys_in;

endmodule
