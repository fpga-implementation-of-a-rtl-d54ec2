`timescale 1ns/1ps
// nco: numerically controlled oscillator producing a digital clock as a
// parallel word for an 8:1 serializer.
//
// A phase accumulator (PACC) of ACC_W bits advances by the jump size M on every
// reference clock. PW phase wheels are evaluated in parallel: wheel k sits
// k*offset ahead of the accumulator, offset = M/PW rounded to the nearest
// integer, so the PW points are the phase of the waveform at PW equally spaced
// instants inside one reference period. The phase-to-amplitude table of a
// clock is a single bit: the upper half of the circle is 1, the lower half 0.
// With the multiplication factor G_MULT the phase is scaled by 2^(G_MULT-1)
// before the table (the table reads bit ACC_W-G_MULT instead of the MSB), so
//     f_out = M * f_C / 2^ACC_W * 2^(G_MULT-1)
// provided M * f_C / 2^ACC_W < f_C / 2 (M < 2^(ACC_W-1)), and M >= PW.
//
// Interface: jump is sampled on every clk edge; word is registered, bit 0 is
// the earliest point in time and must be serialised first. One clk of latency.
// The wheel structure, offset rule, 1-bit table and the frequency law follow
// the source design; the accumulator width is this design's choice.
module nco #(
  parameter int unsigned ACC_W  = 32,
  parameter int unsigned PW     = 8,
  parameter int unsigned G_MULT = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ACC_W-1:0] jump,
  output logic [PW-1:0]    word
);
  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] offset;
  logic [PW-1:0]    point_bits;

  // offset = round(M / PW)
  always_comb offset = (jump + ACC_W'(PW / 2)) / ACC_W'(PW);

  always_comb begin
    for (int unsigned k = 0; k < PW; k++) begin
      logic [ACC_W-1:0] ph;
      ph = acc + ACC_W'(k) * offset;
      point_bits[k] = ph[ACC_W-G_MULT];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      word <= '0;
    end else begin
      acc  <= acc + jump;
      word <= point_bits;
    end
  end

  initial begin
    assert (G_MULT >= 1 && G_MULT <= ACC_W) else $error("nco: G_MULT out of range");
  end
endmodule
