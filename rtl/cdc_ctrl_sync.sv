`timescale 1ns/1ps
// cdc_ctrl_sync: carries a control word from one clock domain to another.
//
// Source side: a one-cycle src_valid_i with src_data_i is captured, the word
// is held stable and a CDC strobe is raised for STRETCH source cycles, then
// kept low for another STRETCH cycles (src_busy_o is high for both phases;
// a request during busy is dropped). Destination side: the strobe passes a
// two-flop synchroniser; its rising edge produces a one-cycle dst_valid_o and
// samples the held word, which has been stable for at least two destination
// cycles by then. STRETCH must cover three destination clock periods.
// Latency: 3 to 4 destination cycles.
//
// Source design: a CDC path where the control word is held stable while a
// strobe is stretched. Own choices: the stretch length, the gap, the 2-flop
// synchroniser and edge detect.
module cdc_ctrl_sync #(
  parameter int unsigned W       = 2,
  parameter int unsigned STRETCH = 4
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic         src_valid_i,
  input  logic [W-1:0] src_data_i,
  output logic         src_busy_o,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic         dst_valid_o,
  output logic [W-1:0] dst_data_o
);
  localparam int unsigned CW = $clog2(2 * STRETCH + 1);

  logic [W-1:0]  hold;
  logic          strobe;
  logic [CW-1:0] cnt;
  logic [2:0]    sync;

  // Source: hold word, stretch strobe.
  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      hold   <= '0;
      strobe <= 1'b0;
      cnt    <= '0;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
      if (cnt == CW'(STRETCH + 1)) strobe <= 1'b0;
    end else if (src_valid_i) begin
      hold   <= src_data_i;
      strobe <= 1'b1;
      cnt    <= CW'(2 * STRETCH);
    end
  end

  assign src_busy_o = (cnt != '0);

  // Destination: synchronise the strobe, sample the word on its rising edge.
  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      sync        <= '0;
      dst_valid_o <= 1'b0;
      dst_data_o  <= '0;
    end else begin
      sync        <= {sync[1:0], strobe};
      dst_valid_o <= sync[1] && !sync[2];
      if (sync[1] && !sync[2]) dst_data_o <= hold;
    end
  end
endmodule
