`timescale 1ns/1ps
// fd_unit: frequency detector unit. A quadrant detector followed by a
// quadrant shifting detector: from the filtered early/late decisions of the
// I and Q phase detectors it reports whether the data edges drift up the
// clock quadrants (shift_up_o, NCO too fast) or down (shift_down_o, NCO too
// slow). Latency: two cycles from the decisions to the shift pulses.
module fd_unit
  import cdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  pd_dec_t   dec_i,
  input  pd_dec_t   dec_q,
  output logic      shift_up_o,
  output logic      shift_down_o,
  output quadrant_e quad_o
);
  logic q_valid;

  quadrant_detector u_qd (
    .clk(clk), .rst(rst), .dec_i(dec_i), .dec_q(dec_q),
    .q_valid_o(q_valid), .quad_o(quad_o)
  );

  quadrant_shift_detector u_qsd (
    .clk(clk), .rst(rst), .q_valid_i(q_valid), .quad_i(quad_o),
    .shift_up_o(shift_up_o), .shift_down_o(shift_down_o)
  );
endmodule
