`timescale 1ns/1ps
// pd_unit: phase detector unit of the phase and frequency detector.
//
// Two bang-bang phase detectors watch the same data stream, one clocked by the
// in-phase clock I_CLK and one by the quadrature clock Q_CLK (Q leads I by 90
// degrees). Their early/late pulses are low-pass filtered by a master/slave
// pair of filters: one master window generator and one slave counter per
// detector, so both decisions come out in the same cycle.
// The Q detector's pulses are re-registered on I_CLK; I and Q share one
// source and have a fixed 90 degree relation, so this is a synchronous
// transfer with a quarter period of slack, not a clock domain crossing.
// Outputs (I_CLK domain): dec_i_o / dec_q_o pulse valid at the end of each
// window; win_end_o marks the same cycle.
//
// Source design: two bang-bang detectors (I and Q) and the master/slave
// filters. Own choices: the shared window and the re-registering of the Q
// pulses onto I_CLK.
module pd_unit
  import cdr_pkg::*;
#(
  parameter int unsigned WIN       = 1024,
  parameter int unsigned THRESH    = 128,
  parameter int unsigned MIN_TRANS = 64
) (
  input  logic    clk_i,     // I_CLK
  input  logic    clk_q,     // Q_CLK
  input  logic    rst,       // synchronous to clk_i
  input  logic    data_i,
  output pd_dec_t dec_i_o,
  output pd_dec_t dec_q_o,
  output logic    win_end_o
);
  logic e_i, l_i, e_q, l_q, d_i_unused, d_q_unused;
  logic e_q_r, l_q_r, rst_q;
  logic win_end;

  // Reset of the Q-clocked detector, taken from the I domain.
  always_ff @(posedge clk_q) rst_q <= rst;

  bb_phase_detector u_pd_i (
    .clk(clk_i), .rst(rst), .data_i(data_i),
    .early_o(e_i), .late_o(l_i), .data_o(d_i_unused)
  );

  bb_phase_detector u_pd_q (
    .clk(clk_q), .rst(rst_q), .data_i(data_i),
    .early_o(e_q), .late_o(l_q), .data_o(d_q_unused)
  );

  always_ff @(posedge clk_i) begin
    if (rst) begin
      e_q_r <= 1'b0;
      l_q_r <= 1'b0;
    end else begin
      e_q_r <= e_q;
      l_q_r <= l_q;
    end
  end

  pd_filter_master #(.WIN(WIN)) u_master (
    .clk(clk_i), .rst(rst), .win_end(win_end)
  );

  pd_filter_slave #(.WIN(WIN), .THRESH(THRESH), .MIN_TRANS(MIN_TRANS)) u_slave_i (
    .clk(clk_i), .rst(rst), .win_end(win_end),
    .early_i(e_i), .late_i(l_i), .dec_o(dec_i_o)
  );

  pd_filter_slave #(.WIN(WIN), .THRESH(THRESH), .MIN_TRANS(MIN_TRANS)) u_slave_q (
    .clk(clk_i), .rst(rst), .win_end(win_end),
    .early_i(e_q_r), .late_i(l_q_r), .dec_o(dec_q_o)
  );

  always_ff @(posedge clk_i) begin
    if (rst) win_end_o <= 1'b0;
    else     win_end_o <= win_end;
  end
endmodule
