`timescale 1ns/1ps
// pd_filter_master: window generator of the phase-detector filter.
// A free-running counter divides time into windows of WIN clock cycles;
// win_end is high on the last cycle of each window. All slave filters that
// hang on the same master decide in the same cycle.
//
// Source design: the master defines the fixed-length window shared by the
// slaves. Own choice: the window length and the pulse timing.
module pd_filter_master #(
  parameter int unsigned WIN = 1024
) (
  input  logic clk,
  input  logic rst,
  output logic win_end
);
  localparam int unsigned CW = (WIN > 1) ? $clog2(WIN) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (cnt == CW'(WIN - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign win_end = (cnt == CW'(WIN - 1));
endmodule
