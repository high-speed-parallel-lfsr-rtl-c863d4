// cut_s27_model: behavioural circuit under test for the system testbench.
// Combinational; y = s27_resp(x, fsel) from s27_tb_pkg (s27 logic with the
// state lines at 0 and an optional injected stuck-at fault).
module cut_s27_model (
  input  logic [3:0] x,
  input  int         fsel,
  output logic [3:0] y
);
  import s27_tb_pkg::*;

  assign y = s27_resp(x, fsel);

endmodule
