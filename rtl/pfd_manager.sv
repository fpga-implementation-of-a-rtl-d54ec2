`timescale 1ns/1ps
// pfd_manager: low-pass filter of the frequency votes and lock controller.
//
// A quadrant shift down (NCO too slow) is a +1 vote for a frequency increase,
// a shift up (NCO too fast) a -1 vote. At most one vote comes per filter
// window, so over a manager window of MGR_WIN filter windows the vote sum c
// lies in [-MGR_WIN, +MGR_WIN]. At the end of each manager window:
//   unlocked: |c| <= LOCK_TH   -> locked flag set
//             c != 0           -> one request in the direction of c
//   locked:   |c| >  UNLOCK_TH -> locked flag cleared, one request
//             |c| >  ACT_TH    -> one request, lock kept
// with LOCK_TH, ACT_TH, UNLOCK_TH = 10 %, 50 %, 90 % of MGR_WIN. Requests are
// one-cycle pulses on freq_inc_o / freq_dec_o; each moves the NCO jump size
// by a fixed step. The three thresholds and their percentages follow the
// source design; the request rule while unlocked and the window length are
// this design's choices.
//
// slot_i marks the end of each filter window and must be aligned with the
// vote of that window (a vote in the same cycle is still counted).
module pfd_manager
  import cdr_pkg::*;
#(
  parameter int unsigned MGR_WIN    = 1024,
  parameter int unsigned LOCK_PCT   = 10,
  parameter int unsigned ACT_PCT    = 50,
  parameter int unsigned UNLOCK_PCT = 90
) (
  input  logic clk,
  input  logic rst,
  input  logic slot_i,
  input  logic shift_up_i,
  input  logic shift_down_i,
  output logic freq_inc_o,
  output logic freq_dec_o,
  output logic locked_o
);
  localparam int unsigned LOCK_TH   = pct_of(MGR_WIN, LOCK_PCT);
  localparam int unsigned ACT_TH    = pct_of(MGR_WIN, ACT_PCT);
  localparam int unsigned UNLOCK_TH = pct_of(MGR_WIN, UNLOCK_PCT);
  localparam int unsigned CW        = $clog2(MGR_WIN + 1) + 1;
  localparam int unsigned SW        = (MGR_WIN > 1) ? $clog2(MGR_WIN) : 1;

  logic signed [CW-1:0] cnt, c;
  logic        [CW-1:0] mag;
  logic        [SW-1:0] slots;

  always_comb begin
    c   = cnt + (shift_down_i ? CW'(1) : CW'(0)) - (shift_up_i ? CW'(1) : CW'(0));
    mag = c[CW-1] ? CW'(-c) : CW'(c);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      slots      <= '0;
      locked_o   <= 1'b0;
      freq_inc_o <= 1'b0;
      freq_dec_o <= 1'b0;
    end else begin
      freq_inc_o <= 1'b0;
      freq_dec_o <= 1'b0;
      if (slot_i && slots == SW'(MGR_WIN - 1)) begin
        cnt   <= '0;
        slots <= '0;
        if (!locked_o) begin
          if (mag <= CW'(LOCK_TH)) locked_o <= 1'b1;
          freq_inc_o <= (c > 0);
          freq_dec_o <= (c < 0);
        end else if (mag > CW'(ACT_TH)) begin
          if (mag > CW'(UNLOCK_TH)) locked_o <= 1'b0;
          freq_inc_o <= (c > 0);
          freq_dec_o <= (c < 0);
        end
      end else begin
        cnt <= c;
        if (slot_i) slots <= slots + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(freq_inc_o && freq_dec_o));
endmodule
