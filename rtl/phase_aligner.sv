`timescale 1ns/1ps
// phase_aligner: places the sampling clock in the middle of the data eye.
//
// A bang-bang phase detector runs on the phase-shiftable clock of the clock
// manager (pa_clk): its rising-edge sample is the recovered data bit, its
// falling-edge sample should sit on the data transitions. Its early/late
// pulses are filtered over windows of WIN cycles (master/slave filter as in
// the frequency path). Once the frequency loop reports lock, each decided
// window becomes one phase-shift request: early -> shift the clock later
// (PSINCDEC=1), late -> earlier (PSINCDEC=0). The request crosses into the
// phase-shift port clock domain (ps_clk) through cdc_ctrl_sync, where a small
// controller raises PSEN for one cycle and waits for PSDONE before it accepts
// the next request. Requests that arrive while a step is in flight are
// dropped. Because the frequency loop only moves in fixed steps, a residual
// frequency error remains; the aligner follows it by stepping continuously.
// The bang-bang detector acting on the clock manager phase shift follows the
// source design; the filter sizes and the request handshake are this
// design's choices.
module phase_aligner
  import cdr_pkg::*;
#(
  parameter int unsigned WIN       = 32,
  parameter int unsigned THRESH    = 4,
  parameter int unsigned MIN_TRANS = 4,
  parameter int unsigned STRETCH   = 4
) (
  input  logic pa_clk,
  input  logic pa_rst,
  input  logic ps_clk,
  input  logic ps_rst,
  input  logic locked_i,     // frequency lock, any domain
  input  logic data_i,
  output logic rec_data_o,   // recovered data, pa_clk domain
  output logic locked_pa_o,  // frequency lock seen in pa_clk domain
  output logic psen_o,
  output logic psincdec_o,
  input  logic psdone_i
);
  typedef enum logic {PS_IDLE, PS_WAIT} ps_state_e;

  logic      early, late, win_end;
  pd_dec_t   dec;
  logic      req_valid, req_inc;
  logic      dst_valid, dst_inc, busy_unused;
  ps_state_e state;

  bb_phase_detector u_pd (
    .clk(pa_clk), .rst(pa_rst), .data_i(data_i),
    .early_o(early), .late_o(late), .data_o(rec_data_o)
  );

  pd_filter_master #(.WIN(WIN)) u_master (
    .clk(pa_clk), .rst(pa_rst), .win_end(win_end)
  );

  pd_filter_slave #(.WIN(WIN), .THRESH(THRESH), .MIN_TRANS(MIN_TRANS)) u_slave (
    .clk(pa_clk), .rst(pa_rst), .win_end(win_end),
    .early_i(early), .late_i(late), .dec_o(dec)
  );

  sync_2ff u_lock_sync (.clk(pa_clk), .rst(pa_rst), .d(locked_i), .q(locked_pa_o));

  always_comb begin
    req_valid = dec.valid && locked_pa_o && (dec.early || dec.late);
    req_inc   = dec.early;
  end

  cdc_ctrl_sync #(.W(1), .STRETCH(STRETCH)) u_cdc (
    .src_clk(pa_clk), .src_rst(pa_rst), .src_valid_i(req_valid), .src_data_i(req_inc),
    .src_busy_o(busy_unused),
    .dst_clk(ps_clk), .dst_rst(ps_rst), .dst_valid_o(dst_valid), .dst_data_o(dst_inc)
  );

  always_ff @(posedge ps_clk) begin
    if (ps_rst) begin
      state      <= PS_IDLE;
      psen_o     <= 1'b0;
      psincdec_o <= 1'b0;
    end else begin
      psen_o <= 1'b0;
      unique case (state)
        PS_IDLE: if (dst_valid) begin
          psen_o     <= 1'b1;
          psincdec_o <= dst_inc;
          state      <= PS_WAIT;
        end
        PS_WAIT: if (psdone_i) state <= PS_IDLE;
        default: state <= PS_IDLE;
      endcase
    end
  end
endmodule
