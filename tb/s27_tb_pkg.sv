// s27_tb_pkg: combinational stand-in for the circuit under test, shared by
// the CUT model and the system testbench's reference.
//
// It is the logic of the ISCAS-89 s27 benchmark with its four primary inputs
// G0..G3 taken from scan cells FF1..FF4 and its three state lines G5, G6, G7
// held at 0. The four responses returned, captured back into FF1..FF4, are
// G17, G10, G11 and G13. `fsel` injects one single stuck-at fault:
//   0 none, 1 G11 stuck-at-0, 2 G12 stuck-at-1, 3 G8 stuck-at-1,
//   4 G16 stuck-at-0, 5 G10 stuck-at-1, 6 G13 stuck-at-0
package s27_tb_pkg;

  function automatic logic [3:0] s27_resp(input logic [3:0] x, input int fsel);
    logic g0, g1, g2, g3, g5, g6, g7;
    logic g8, g9, g10, g11, g12, g13, g14, g15, g16, g17;
    {g3, g2, g1, g0} = x;
    {g5, g6, g7} = 3'b000;
    g14 = ~g0;
    g12 = ~(g1 | g7);
    if (fsel == 2) g12 = 1'b1;
    g8  = g14 & g6;
    if (fsel == 3) g8 = 1'b1;
    g15 = g12 | g8;
    g16 = g3 | g8;
    if (fsel == 4) g16 = 1'b0;
    g9  = ~(g16 & g15);
    g11 = ~(g5 | g9);
    if (fsel == 1) g11 = 1'b0;
    g10 = ~(g14 | g11);
    if (fsel == 5) g10 = 1'b1;
    g13 = ~(g2 | g12);
    if (fsel == 6) g13 = 1'b0;
    g17 = ~g11;
    return {g13, g11, g10, g17};
  endfunction

endpackage
