`timescale 1ns/1ps
// bb_phase_detector: Alexander (bang-bang) phase detector.
//
// The data are sampled on the rising clock edge (bit sample A) and on the
// falling edge (edge sample T, half a period later). When two successive bit
// samples differ, a transition happened between them and the edge sample says
// on which side of the falling edge it was:
//   T == previous bit : transition after the falling edge  -> clock early
//   T == next bit     : transition before the falling edge -> clock late
// Only the sign of the phase error is known, never its size.
//
// Timing: early_o / late_o are registered and valid two rising edges after the
// second bit sample; at most one of them is high, and only for one cycle.
// data_o is the bit sample (the recovered data) in the clk domain.
module bb_phase_detector (
  input  logic clk,
  input  logic rst,
  input  logic data_i,
  output logic early_o,
  output logic late_o,
  output logic data_o
);
  logic t_neg;        // sampled on the falling edge
  logic a1, a2, t1;   // A(n+1), A(n), T(n)
  logic edge_q, dir_q; // registered transition flag and early/late direction

  always_ff @(negedge clk) t_neg <= data_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      a1      <= 1'b0;
      a2      <= 1'b0;
      t1      <= 1'b0;
      edge_q  <= 1'b0;
      dir_q   <= 1'b0;
    end else begin
      a1      <= data_i;
      a2      <= a1;
      t1      <= t_neg;
      edge_q  <= (a1 != a2);
      dir_q   <= (t1 == a2);     // 1: early, 0: late
    end
  end

  // Early and late come from one transition flag and one direction flag, so
  // they can never be high together, not even before the first reset.
  assign early_o = edge_q && dir_q;
  assign late_o  = edge_q && !dir_q;

  assign data_o = a2;

  assert property (@(posedge clk) disable iff (rst) !(early_o && late_o));
endmodule
