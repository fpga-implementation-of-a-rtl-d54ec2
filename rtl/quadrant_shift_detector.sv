`timescale 1ns/1ps
// quadrant_shift_detector: turns successive quadrants into frequency votes.
//
// The last reported quadrant is stored. When a new one arrives:
//   one quadrant up   (phase of the data edges grows, the clock period is
//                      shorter than the bit: f_NCO > f_d)  -> shift_up_o
//   one quadrant down (f_NCO < f_d)                         -> shift_down_o
//   same quadrant                                           -> nothing
//   two quadrants     (direction unknown)                   -> nothing
// The first quadrant after reset only initialises the store.
// Outputs are one-cycle registered pulses.
module quadrant_shift_detector
  import cdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      q_valid_i,
  input  quadrant_e quad_i,
  output logic      shift_up_o,
  output logic      shift_down_o
);
  quadrant_e  prev;
  logic       have_prev;
  logic [1:0] diff;

  always_comb diff = 2'(quad_i - prev);

  always_ff @(posedge clk) begin
    if (rst) begin
      prev         <= QUAD_0;
      have_prev    <= 1'b0;
      shift_up_o   <= 1'b0;
      shift_down_o <= 1'b0;
    end else begin
      shift_up_o   <= 1'b0;
      shift_down_o <= 1'b0;
      if (q_valid_i) begin
        prev      <= quad_i;
        have_prev <= 1'b1;
        if (have_prev) begin
          shift_up_o   <= (diff == 2'd1);
          shift_down_o <= (diff == 2'd3);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(shift_up_o && shift_down_o));
endmodule
