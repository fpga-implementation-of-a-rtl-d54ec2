`timescale 1ns/1ps
// oserdese2_model: behavioural model (not synthesizable logic) of the FPGA's
// 8:1 DDR output serializer tile. In the real device this is a vendor
// primitive; here it only reproduces its function for simulation.
//
// D is captured on every rising CLKDIV edge. The word is sent bit 0 first,
// one bit on every edge of CLK (DDR), CLK being 4x CLKDIV and edge aligned
// with it, so one word fills exactly one CLKDIV period. The frame starts on
// the first falling CLK edge after CLKDIV rises (half a CLK period after the
// word was captured): a fixed latency, as in the real tile. RST forces OQ low.
//
// Source design: 8:1 serialisation in DDR mode with a 500 MHz clock. Own
// choices: bit order (D[0] first) and no pipeline latency.
module oserdese2_model #(
  parameter int DATA_WIDTH = 8
) (
  input  logic                  CLK,
  input  logic                  CLKDIV,
  input  logic                  RST,
  input  logic [DATA_WIDTH-1:0] D,
  output logic                  OQ
);
  logic [DATA_WIDTH-1:0] load_q;
  logic [DATA_WIDTH-1:0] cur;
  logic                  div_q;
  int                    idx;

  initial begin
    OQ     = 1'b0;
    load_q = '0;
    cur    = '0;
    div_q  = 1'b0;
    idx    = DATA_WIDTH;
  end

  always @(posedge CLKDIV) load_q <= D;

  always @(posedge CLK or negedge CLK) begin
    if (RST) begin
      OQ  <= 1'b0;
      idx  = DATA_WIDTH;
    end else begin
      if (!CLK) begin
        // CLKDIV only changes on rising CLK edges, so it is stable here.
        if (CLKDIV && !div_q) begin
          cur = load_q;
          idx = 0;
        end
        div_q = CLKDIV;
      end
      if (idx < DATA_WIDTH) begin
        OQ <= cur[idx];
        idx = idx + 1;
      end
    end
  end
endmodule
