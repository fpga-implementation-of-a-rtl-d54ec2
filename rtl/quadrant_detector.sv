`timescale 1ns/1ps
// quadrant_detector: locates the data transitions inside the clock period.
//
// I_CLK's detector splits the period at 180 degrees (late: 0..180, early:
// 180..360), Q_CLK's detector, 90 degrees ahead, splits it at 90/270 degrees
// (late: 270..90, early: 90..270). Together they give the quadrant:
//   I late,  Q late  -> QUAD_0      I late,  Q early -> QUAD_1
//   I early, Q early -> QUAD_2      I early, Q late  -> QUAD_3
// A quadrant is reported (q_valid_o for one cycle, registered) only when both
// filtered detectors gave a decision in the window; near a quadrant boundary
// one of them is undecided and nothing is reported.
//
// Source design: the quadrant follows from the early/late decisions of the I
// and Q detectors. Own choice: the exact mapping table and the handling of
// undecided windows.
module quadrant_detector
  import cdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  pd_dec_t   dec_i,
  input  pd_dec_t   dec_q,
  output logic      q_valid_o,
  output quadrant_e quad_o
);
  logic      both;
  quadrant_e quad_nx;

  always_comb begin
    both = dec_i.valid && dec_q.valid &&
           (dec_i.early || dec_i.late) && (dec_q.early || dec_q.late);
    unique case ({dec_i.late, dec_q.late})
      2'b11:   quad_nx = QUAD_0;
      2'b10:   quad_nx = QUAD_1;
      2'b00:   quad_nx = QUAD_2;
      default: quad_nx = QUAD_3;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q_valid_o <= 1'b0;
      quad_o    <= QUAD_0;
    end else begin
      q_valid_o <= both;
      if (both) quad_o <= quad_nx;
    end
  end
endmodule
