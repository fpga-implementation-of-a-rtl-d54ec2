`timescale 1ns/1ps
// cdr_top: NCO-based clock and data recovery core.
//
// Clock path: the frequency manager holds the jump size M; the NCO turns it
// into 8 phase points per system clock, the serializer sends them at 1 Gbps
// on nco_clk_o. On the board that pin is looped back to nco_clk_lb_i, which
// feeds the clock manager. The clock manager gives I_CLK, Q_CLK (90 degrees
// ahead) and a phase-shiftable copy of I_CLK, the recovered clock rec_clk_o.
// Frequency loop (I_CLK domain): the phase and frequency detector compares the
// data edges with I_CLK and Q_CLK, finds which quadrant they drift through and
// issues +/-1 frequency requests and the lock flag. Requests cross into the
// system clock domain through cdc_ctrl_sync and step M.
// Phase loop (rec_clk_o domain): once locked, the phase aligner steps the
// clock manager's phase shift until rec_clk_o samples mid-eye.
// Data path: the phase aligner's bit sample is the recovered data; a PRBS-7
// checker counts its errors while the loop is locked. A PRBS-7 generator on
// sys_clk drives prbs_tx_o, the pattern the transmitting board sends.
//
// Clocks and reset: sys_clk is the reference f_C (125 MHz), ser_clk is 4x
// sys_clk and edge aligned with it (serializer DDR clock). rst is active
// high, synchronous to sys_clk; the I_CLK and rec_clk_o domains get their own
// reset synchronisers, held in reset while the clock manager is not locked.
// The serializer and the clock manager are vendor tiles, represented here by
// behavioural models, so this top is for simulation; for an FPGA replace the
// two models by the device primitives.
module cdr_top
  import cdr_pkg::*;
#(
  parameter int unsigned ACC_W       = 32,
  parameter int unsigned PW          = 8,
  parameter int unsigned G_MULT      = 3,
  parameter logic [ACC_W-1:0] M_INIT = ACC_W'(1) << (ACC_W - 2),
  parameter logic [ACC_W-1:0] M_STEP = ACC_W'(1024),
  parameter int unsigned FILT_WIN    = 1024,
  parameter int unsigned FILT_TH     = 128,
  parameter int unsigned FILT_MIN    = 64,
  parameter int unsigned MGR_WIN     = 1024,
  parameter int unsigned LOCK_PCT    = 10,
  parameter int unsigned ACT_PCT     = 50,
  parameter int unsigned UNLOCK_PCT  = 90,
  parameter int unsigned PA_WIN      = 32,
  parameter int unsigned PA_TH       = 4,
  parameter int unsigned PA_MIN      = 4,
  parameter int unsigned CDC_STRETCH = 4,
  parameter real         PS_STEP_NS  = 0.017857
) (
  input  logic             sys_clk,
  input  logic             ser_clk,
  input  logic             rst,
  input  logic             data_i,
  output logic             nco_clk_o,
  input  logic             nco_clk_lb_i,
  output logic             rec_clk_o,
  output logic             rec_data_o,
  output logic             locked_o,
  output logic [ACC_W-1:0] jump_o,
  output logic [31:0]      prbs_err_cnt_o,
  output logic [47:0]      prbs_bit_cnt_o,
  output logic             prbs_tx_o
);
  logic [PW-1:0] nco_word;
  logic clk_i, clk_q, clk_pa;
  logic mmcm_locked, psen, psincdec, psdone;
  logic rst_i, rst_pa, rst_sys, rst_async;
  logic freq_inc, freq_dec, locked_i, locked_pa;
  logic req_busy_unused, sys_req_valid, prbs_sync_unused;
  logic [1:0] sys_req;

  // ---------------- system clock domain: frequency manager, NCO ----------
  freq_manager #(.ACC_W(ACC_W), .M_INIT(M_INIT), .M_STEP(M_STEP)) u_freq_mgr (
    .clk(sys_clk), .rst(rst),
    .inc_i(sys_req_valid && sys_req[0]), .dec_i(sys_req_valid && sys_req[1]),
    .jump_o(jump_o)
  );

  nco #(.ACC_W(ACC_W), .PW(PW), .G_MULT(G_MULT)) u_nco (
    .clk(sys_clk), .rst(rst), .jump(jump_o), .word(nco_word)
  );

  oserdese2_model #(.DATA_WIDTH(PW)) u_oserdes (
    .CLK(ser_clk), .CLKDIV(sys_clk), .RST(rst), .D(nco_word), .OQ(nco_clk_o)
  );

  // ---------------- clock manager on the looped-back NCO clock ------------
  mmcme2_model #(.PS_STEP_NS(PS_STEP_NS)) u_mmcm (
    .CLKIN1(nco_clk_lb_i), .RST(rst), .PSCLK(sys_clk), .PSEN(psen),
    .PSINCDEC(psincdec), .CLKOUT0(clk_i), .CLKOUT1(clk_q), .CLKOUT2(clk_pa),
    .PSDONE(psdone), .LOCKED(mmcm_locked)
  );

  assign rst_async = rst || !mmcm_locked;

  rst_sync u_rst_i  (.clk(clk_i),  .arst(rst_async), .rst_o(rst_i));
  rst_sync u_rst_pa (.clk(clk_pa), .arst(rst_async), .rst_o(rst_pa));
  // Receiving side of the request crossing: held in reset together with the
  // sending side, so no stray strobe from unreset I-domain flops gets through.
  rst_sync u_rst_sys (.clk(sys_clk), .arst(rst_async), .rst_o(rst_sys));

  // ---------------- I_CLK domain: phase and frequency detector ------------
  pfd #(
    .WIN(FILT_WIN), .THRESH(FILT_TH), .MIN_TRANS(FILT_MIN), .MGR_WIN(MGR_WIN),
    .LOCK_PCT(LOCK_PCT), .ACT_PCT(ACT_PCT), .UNLOCK_PCT(UNLOCK_PCT)
  ) u_pfd (
    .clk_i(clk_i), .clk_q(clk_q), .rst(rst_i), .data_i(data_i),
    .freq_inc_o(freq_inc), .freq_dec_o(freq_dec), .locked_o(locked_i),
    .quad_o(), .shift_up_o(), .shift_down_o()
  );

  cdc_ctrl_sync #(.W(2), .STRETCH(CDC_STRETCH)) u_cdc_freq (
    .src_clk(clk_i), .src_rst(rst_i), .src_valid_i(freq_inc || freq_dec),
    .src_data_i({freq_dec, freq_inc}), .src_busy_o(req_busy_unused),
    .dst_clk(sys_clk), .dst_rst(rst_sys), .dst_valid_o(sys_req_valid), .dst_data_o(sys_req)
  );

  // The lock flag synchroniser is reset together with the I domain, so the PFD
  // flops (undefined until the clock manager delivers clk_i) never show.
  logic locked_sys;
  sync_2ff u_lock_sys (.clk(sys_clk), .rst(rst_sys), .d(locked_i), .q(locked_sys));
  assign locked_o = locked_sys && !rst;

  // ---------------- recovered clock domain: phase aligner, checker --------
  phase_aligner #(
    .WIN(PA_WIN), .THRESH(PA_TH), .MIN_TRANS(PA_MIN), .STRETCH(CDC_STRETCH)
  ) u_pa (
    .pa_clk(clk_pa), .pa_rst(rst_pa), .ps_clk(sys_clk), .ps_rst(rst_sys),
    .locked_i(locked_i), .data_i(data_i), .rec_data_o(rec_data_o),
    .locked_pa_o(locked_pa), .psen_o(psen), .psincdec_o(psincdec), .psdone_i(psdone)
  );

  prbs_checker u_prbs_chk (
    .clk(clk_pa), .rst(rst_pa), .en(locked_pa), .bit_i(rec_data_o),
    .err_cnt_o(prbs_err_cnt_o), .bit_cnt_o(prbs_bit_cnt_o), .sync_o(prbs_sync_unused)
  );

  assign rec_clk_o = clk_pa;

  // Test pattern source of the transmitting board, one bit per sys_clk cycle.
  // It stands beside the CDR (same firmware on both boards of the test
  // set-up) and is not connected to the receive path.
  prbs_gen u_prbs_gen (.clk(sys_clk), .rst(rst), .en(1'b1), .bit_o(prbs_tx_o));
endmodule
