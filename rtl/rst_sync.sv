`timescale 1ns/1ps
// rst_sync: reset synchroniser of a clock domain. rst_o rises at once with
// arst (asynchronous assertion, the clock may not be running) and falls on
// the second clk edge after arst has fallen (synchronous release).
//
// Own choice: helper not described in the source design.
module rst_sync (
  input  logic clk,
  input  logic arst,    // asynchronous, active high
  output logic rst_o
);
  logic meta;

  always_ff @(posedge clk or posedge arst) begin
    if (arst) begin
      meta  <= 1'b1;
      rst_o <= 1'b1;
    end else begin
      meta  <= 1'b0;
      rst_o <= meta;
    end
  end
endmodule
