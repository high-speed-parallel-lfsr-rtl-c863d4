// test_controller: sequences one BIST run.
//
// After `start` the controller applies N_LT low-transition patterns and then
// N_WR weighted patterns. Each pattern takes L shift cycles (the pattern goes
// in while the previous response comes out) and one capture cycle (the scan
// cells load the CUT response). After the last capture, L unload cycles move
// the final response into the signature analyser, one compare cycle strobes
// the comparator, and the controller rests in DONE until the next start.
// A run therefore lasts (N_LT + N_WR) * (L + 1) + L + 1 cycles from the
// cycle after `start` to the compare edge; `done` rises one cycle later.
//
// Outputs (all decoded from registers, except ora_clr/cmp_clr, which follow
// `start`):
//   tpg_en  advance the LFSR and toggle flip-flop (shift cycles)
//   src     scan-in source, SRC_LT for the first N_LT patterns, then SRC_WR
//   wr_cell logical scan cell whose weight the weighted generator must apply
//           in the next cycle (its output is registered)
//   scan_en / capture   scan chain control
//   ora_en  analyser takes scan-out (all shifts except the first pattern's,
//           which would only unload the reset value)
//   check   comparator strobe; test_mode selects scan cells as CUT inputs
//
// The two phases, LT first and weighted second, follow the document; the
// pattern counts, shift/capture protocol and state encoding are this
// design's choices.
module test_controller
  import bist_pkg::*;
#(
  parameter int unsigned L     = SCAN_LEN_DEF,
  parameter int unsigned N_LT  = 16,
  parameter int unsigned N_WR  = 16,
  parameter int unsigned ORDER [L] = SCAN_ORDER_DEF,
  localparam int unsigned CW   = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned PW   = $clog2(N_LT + N_WR + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output ctrl_state_e   state,
  output tpg_src_e      src,
  output logic          tpg_en,
  output logic [CW-1:0] wr_cell,
  output logic          scan_en,
  output logic          capture,
  output logic          ora_clr,
  output logic          ora_en,
  output logic          cmp_clr,
  output logic          check,
  output logic          test_mode,
  output logic          busy,
  output logic          done
);

  logic [CW-1:0] bit_cnt;
  logic [PW-1:0] pat_cnt;
  logic          last_bit;
  logic [CW-1:0] next_pos;
  logic          idle_like;

  assign last_bit  = (bit_cnt == CW'(L - 1));
  assign idle_like = (state == ST_IDLE) || (state == ST_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_IDLE;
      src     <= SRC_LT;
      bit_cnt <= '0;
      pat_cnt <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state   <= ST_SHIFT;
            src     <= (N_LT == 0) ? SRC_WR : SRC_LT;
            bit_cnt <= '0;
            pat_cnt <= '0;
          end
        end
        ST_SHIFT: begin
          bit_cnt <= bit_cnt + 1'b1;
          if (last_bit) begin
            bit_cnt <= '0;
            state   <= ST_CAPTURE;
          end
        end
        ST_CAPTURE: begin
          pat_cnt <= pat_cnt + 1'b1;
          if (pat_cnt == PW'(N_LT - 1)) src <= SRC_WR;
          state <= (pat_cnt == PW'(N_LT + N_WR - 1)) ? ST_UNLOAD : ST_SHIFT;
        end
        ST_UNLOAD: begin
          bit_cnt <= bit_cnt + 1'b1;
          if (last_bit) begin
            bit_cnt <= '0;
            state   <= ST_COMPARE;
          end
        end
        ST_COMPARE: state <= ST_DONE;
        default:    state <= ST_IDLE;
      endcase
    end
  end

  // Shift position of the bit entering the chain next cycle; the bit shifted
  // in at position j ends up L-1-j cells downstream of scan-in.
  assign next_pos = (state == ST_SHIFT && !last_bit) ? bit_cnt + 1'b1 : '0;
  assign wr_cell  = CW'(ORDER[CW'(L - 1) - next_pos]);

  assign tpg_en    = (state == ST_SHIFT);
  assign scan_en   = (state == ST_SHIFT) || (state == ST_UNLOAD);
  assign capture   = (state == ST_CAPTURE);
  assign ora_clr   = idle_like && start;
  assign cmp_clr   = idle_like && start;
  assign ora_en    = ((state == ST_SHIFT) && (pat_cnt != '0)) || (state == ST_UNLOAD);
  assign check     = (state == ST_COMPARE);
  assign test_mode = !idle_like;
  assign busy      = !idle_like;
  assign done      = (state == ST_DONE);

  initial begin
    assert (N_LT + N_WR >= 1) else $error("test_controller: no patterns to apply");
  end

  // Protocol rules: shift and capture never together; the generator only
  // advances while shifting; the compare strobe is a single cycle.
  a_shift_xor_capture: assert property (@(posedge clk) disable iff (rst) !(scan_en && capture));
  a_tpg_only_shifting: assert property (@(posedge clk) disable iff (rst) tpg_en |-> scan_en);
  a_check_one_cycle:   assert property (@(posedge clk) disable iff (rst) check |=> !check);

endmodule
