`timescale 1ns/1ps
// freq_manager: owns the NCO jump size M in the system clock domain.
// Every inc_i pulse raises M by M_STEP, every dec_i pulse lowers it by M_STEP,
// whatever the size of the frequency error (the bang-bang detectors cannot
// measure it). M is kept inside [M_MIN, M_MAX]; the defaults are the limits of
// the NCO (M >= PW wheels, M < 2^(ACC_W-1) for the Nyquist rule). After reset
// M = M_INIT, by default the nominal 125 MHz setting of a 125 MHz reference
// with multiplication factor 3: M = 2^(ACC_W-2).
// jump_o is registered; it changes one cycle after the request.
module freq_manager #(
  parameter int unsigned   ACC_W  = 32,
  parameter logic [ACC_W-1:0] M_INIT = ACC_W'(1) << (ACC_W - 2),
  parameter logic [ACC_W-1:0] M_STEP = ACC_W'(1024),
  parameter logic [ACC_W-1:0] M_MIN  = ACC_W'(8),
  parameter logic [ACC_W-1:0] M_MAX  = (ACC_W'(1) << (ACC_W - 1)) - 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc_i,
  input  logic             dec_i,
  output logic [ACC_W-1:0] jump_o
);
  always_ff @(posedge clk) begin
    if (rst) begin
      jump_o <= M_INIT;
    end else if (inc_i && !dec_i) begin
      jump_o <= (jump_o > M_MAX - M_STEP) ? M_MAX : jump_o + M_STEP;
    end else if (dec_i && !inc_i) begin
      jump_o <= (jump_o < M_MIN + M_STEP) ? M_MIN : jump_o - M_STEP;
    end
  end
endmodule
