`timescale 1ns/1ps
// sync_2ff: two-flop synchroniser for a level signal entering the clock domain
// of clk. The output follows the input two clk edges later. rst is a
// synchronous reset of the receiving domain and clears both flops.
//
// Own choice: helper not described in the source design.
module sync_2ff (
  input  logic clk,
  input  logic rst,     // synchronous to clk, active high
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
