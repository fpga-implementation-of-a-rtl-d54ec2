`timescale 1ns/1ps
// pd_filter_slave: low-pass filter for the pulses of a bang-bang phase
// detector. Inside each window given by the master, a signed counter goes up
// on a 'late' pulse and down on an 'early' pulse, and a second counter counts
// all transitions. On win_end the window is closed (including that cycle's
// pulse) and dec_o.valid pulses for one cycle with
//   late  if count >  THRESH and transitions >= MIN_TRANS
//   early if count < -THRESH and transitions >= MIN_TRANS
//   neither otherwise.
// Both counters then restart from zero. The counting scheme follows the
// source design; THRESH and MIN_TRANS values are this design's choice.
module pd_filter_slave
  import cdr_pkg::*;
#(
  parameter int unsigned WIN       = 1024,
  parameter int unsigned THRESH    = 128,
  parameter int unsigned MIN_TRANS = 64
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    win_end,
  input  logic    early_i,
  input  logic    late_i,
  output pd_dec_t dec_o
);
  localparam int unsigned CW = $clog2(WIN + 1) + 1;
  logic signed [CW-1:0] cnt, cnt_nx;
  logic        [CW-1:0] trans, trans_nx;

  always_comb begin
    cnt_nx   = cnt + (late_i ? CW'(1) : CW'(0)) - (early_i ? CW'(1) : CW'(0));
    trans_nx = trans + ((early_i || late_i) ? CW'(1) : CW'(0));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      trans <= '0;
      dec_o <= '0;
    end else begin
      dec_o <= '0;
      if (win_end) begin
        dec_o.valid <= 1'b1;
        if (trans_nx >= CW'(MIN_TRANS)) begin
          dec_o.late  <= (cnt_nx >  $signed(CW'(THRESH)));
          dec_o.early <= (cnt_nx < -$signed(CW'(THRESH)));
        end
        cnt   <= '0;
        trans <= '0;
      end else begin
        cnt   <= cnt_nx;
        trans <= trans_nx;
      end
    end
  end
endmodule
