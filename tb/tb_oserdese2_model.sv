`timescale 1ns/1ps
// tb_oserdese2_model: sends random 8-bit words through the serializer model
// and reads the serial output in the middle of every bit (1 ns bits, DDR on a
// 500 MHz clock). The bit stream must equal the words, bit 0 first, at a
// fixed latency, with one word per 8 ns.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_oserdese2_model;
  logic clk = 1'b0, clkdiv = 1'b0, rst = 1'b1;
  logic [7:0] d = '0;
  logic oq;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  logic bits[$];

  always #1 clk = ~clk;
  always #4 clkdiv = ~clkdiv;

  oserdese2_model dut (.CLK(clk), .CLKDIV(clkdiv), .RST(rst), .D(d), .OQ(oq));

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Serial sampling in the middle of each bit: bits change on CLK edges.
  initial begin
    #0.5;
    forever begin
      #1;
      bits.push_back(oq);
    end
  end

  int start;
  initial begin
    repeat (4) @(posedge clkdiv);
    rst <= 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clkdiv);
      d <= 8'($urandom);
      sent.push_back(d);
    end
    @(posedge clkdiv); @(posedge clkdiv);
    // Find the first word in the stream, then compare everything after it.
    start = -1;
    for (int s = 0; s < bits.size() - 8 && start < 0; s++) begin
      logic [7:0] w;
      for (int k = 0; k < 8; k++) w[k] = bits[s + k];
      if (w == sent[5] && bits[s - 8*5] !== 1'bx) begin
        logic ok = 1'b1;
        for (int j = 6; j < 12; j++)
          for (int k = 0; k < 8; k++) if (bits[s + 8*(j-5) + k] !== sent[j][k]) ok = 1'b0;
        if (ok) start = s - 8*5;
      end
    end
    checks++;
    if (start < 0) begin failures++; $display("FAIL: word stream not found"); end
    else begin
      for (int j = 0; j < 195; j++) begin
        logic [7:0] w;
        for (int k = 0; k < 8; k++) w[k] = bits[start + 8*j + k];
        checks++;
        if (w !== sent[j]) begin failures++; if (failures < 5) $display("FAIL word %0d %h exp %h", j, w, sent[j]); end
      end
      // The word captured at time t starts to leave half a CLK period later.
      checks++;
      if ((start % 8) != 4 && (start % 8) != 3 && (start % 8) != 5) begin
        failures++; $display("FAIL frame offset %0d", start % 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
