`timescale 1ns/1ps
// prbs_gen: PRBS-7 pattern source (polynomial x^7 + x^6 + 1, period 127).
// One bit per enabled clock on bit_o (registered). SEED must be non-zero.
//
// Source design: a PRBS-7 test pattern. Own choices: the polynomial
// x^7+x^6+1 and the all-ones seed.
module prbs_gen #(
  parameter logic [6:0] SEED = 7'h7F
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic bit_o
);
  logic [6:0] sr;
  logic       fb;

  always_comb fb = sr[6] ^ sr[5];

  always_ff @(posedge clk) begin
    if (rst) begin
      sr    <= SEED;
      bit_o <= 1'b0;
    end else if (en) begin
      sr    <= {sr[5:0], fb};
      bit_o <= fb;
    end
  end
endmodule
