`timescale 1ns/1ps
// prbs_checker: self-synchronising PRBS-7 (x^7 + x^6 + 1) checker with an
// error counter, used to measure the bit error ratio of the recovered data.
// The last seven received bits predict the next one (b[n] = b[n-7] ^ b[n-6]);
// every mismatch is an error. A single wrong bit therefore counts three times
// (once itself, then twice as it passes the two taps). Errors are counted
// only while en is high and after seven bits have filled the register; both
// counters saturate. The 48-bit bit counter holds a 10^-12 BER run at
// 95 % confidence (3e12 bits, 400 minutes at 125 Mbps). sync_o is high while
// the last 7 bits matched.
//
// Source design: a PRBS-7 checker with an error counter. Own choices: the
// polynomial x^7+x^6+1, the self-synchronising structure and the counter
// widths.
module prbs_checker #(
  parameter int unsigned ERR_W = 32,
  parameter int unsigned BIT_W = 48
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             bit_i,
  output logic [ERR_W-1:0] err_cnt_o,
  output logic [BIT_W-1:0] bit_cnt_o,
  output logic             sync_o
);
  logic [6:0] sr;
  logic [2:0] fill;
  logic [2:0] good;
  logic       err;

  always_comb err = (fill == 3'd7) && (bit_i != (sr[6] ^ sr[5]));

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      fill      <= '0;
      good      <= '0;
      err_cnt_o <= '0;
      bit_cnt_o <= '0;
      sync_o    <= 1'b0;
    end else begin
      sr <= {sr[5:0], bit_i};
      if (fill != 3'd7) fill <= fill + 1'b1;
      if (err)               good <= '0;
      else if (good != 3'd7) good <= good + 1'b1;
      sync_o <= !err && (good >= 3'd6) && (fill == 3'd7);
      if (en && fill == 3'd7) begin
        if (bit_cnt_o != '1) bit_cnt_o <= bit_cnt_o + 1'b1;
        if (err && err_cnt_o != '1) err_cnt_o <= err_cnt_o + 1'b1;
      end
    end
  end
endmodule
