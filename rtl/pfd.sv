`timescale 1ns/1ps
// pfd: phase and frequency detector, all in the I_CLK (NCO clock) domain.
//
// data_i -> pd_unit (bang-bang detectors on I_CLK and Q_CLK, filtered once per
// window of WIN cycles) -> fd_unit (quadrant and quadrant shift) ->
// pfd_manager (vote counting over MGR_WIN windows, lock flag, requests).
// The filter-window tick is delayed by the two register stages of the
// frequency detector so that the manager sees each window's vote together
// with its tick.
// Outputs: freq_inc_o / freq_dec_o one-cycle requests, locked_o level, and
// for observation the current quadrant and the shift pulses.
//
// Source design: PD unit, FD unit and manager in cascade. Own choice: the
// two-cycle alignment of the manager slot.
module pfd
  import cdr_pkg::*;
#(
  parameter int unsigned WIN        = 1024,
  parameter int unsigned THRESH     = 128,
  parameter int unsigned MIN_TRANS  = 64,
  parameter int unsigned MGR_WIN    = 1024,
  parameter int unsigned LOCK_PCT   = 10,
  parameter int unsigned ACT_PCT    = 50,
  parameter int unsigned UNLOCK_PCT = 90
) (
  input  logic      clk_i,
  input  logic      clk_q,
  input  logic      rst,
  input  logic      data_i,
  output logic      freq_inc_o,
  output logic      freq_dec_o,
  output logic      locked_o,
  output quadrant_e quad_o,
  output logic      shift_up_o,
  output logic      shift_down_o
);
  pd_dec_t    dec_i, dec_q;
  logic       win_end;
  logic [1:0] slot_dly;

  pd_unit #(.WIN(WIN), .THRESH(THRESH), .MIN_TRANS(MIN_TRANS)) u_pd_unit (
    .clk_i(clk_i), .clk_q(clk_q), .rst(rst), .data_i(data_i),
    .dec_i_o(dec_i), .dec_q_o(dec_q), .win_end_o(win_end)
  );

  fd_unit u_fd_unit (
    .clk(clk_i), .rst(rst), .dec_i(dec_i), .dec_q(dec_q),
    .shift_up_o(shift_up_o), .shift_down_o(shift_down_o), .quad_o(quad_o)
  );

  always_ff @(posedge clk_i) begin
    if (rst) slot_dly <= '0;
    else     slot_dly <= {slot_dly[0], win_end};
  end

  pfd_manager #(
    .MGR_WIN(MGR_WIN), .LOCK_PCT(LOCK_PCT), .ACT_PCT(ACT_PCT), .UNLOCK_PCT(UNLOCK_PCT)
  ) u_mgr (
    .clk(clk_i), .rst(rst), .slot_i(slot_dly[1]),
    .shift_up_i(shift_up_o), .shift_down_i(shift_down_o),
    .freq_inc_o(freq_inc_o), .freq_dec_o(freq_dec_o), .locked_o(locked_o)
  );
endmodule
