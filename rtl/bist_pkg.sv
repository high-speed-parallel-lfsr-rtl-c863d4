// bist_pkg: types and constants shared by the low-transition scan BIST.
//
// The scan chain for the s27 example has four cells FF1..FF4. Their stitching
// order follows from the pairwise transition counts of the deterministic
// vectors and responses of s27 (FF1-FF2 6, FF1-FF3 3, FF1-FF4 2, FF2-FF3 5,
// FF2-FF4 4, FF3-FF4 5). The cheapest path through all four cells is
// FF3-FF1-FF4-FF2 with 3+2+4 = 9 transitions; SCAN_ORDER_DEF lists it as
// 0-based cell numbers, scan-in side first. The path is this design's
// solution of the reordering problem; the transition counts are the document's.
package bist_pkg;

  // Length of the scan chain and of the bit-swapping LFSR in the example.
  localparam int unsigned SCAN_LEN_DEF = 4;
  localparam int unsigned LFSR_LEN_DEF = 4;

  // Physical position p (0 = next to scan-in) holds logical cell SCAN_ORDER_DEF[p].
  localparam int unsigned SCAN_ORDER_DEF [SCAN_LEN_DEF] = '{2, 0, 3, 1};

  // Scan-in source chosen by the pattern-generator multiplexer.
  typedef enum logic {
    SRC_LT = 1'b0,   // low-transition BIST (AND gate + toggle flip-flop)
    SRC_WR = 1'b1    // adder-based 3-weight random BIST
  } tpg_src_e;

  // States of the test controller.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for start
    ST_SHIFT   = 3'd1,  // shifting a pattern in (and the previous response out)
    ST_CAPTURE = 3'd2,  // scan cells load the CUT response
    ST_UNLOAD  = 3'd3,  // shifting the last response out
    ST_COMPARE = 3'd4,  // signature compared with the expected one
    ST_DONE    = 3'd5   // verdict stable until the next start
  } ctrl_state_e;

endpackage
