`timescale 1ns/1ps
// tb_cdc_ctrl_sync: 2-bit control words cross from an 8 ns to a 7.3 ns clock
// (no common edges, a drifting phase relation). Every word offered while the
// source is not busy must arrive exactly once, in order and unchanged;
// words offered while busy are dropped.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_cdc_ctrl_sync;
  logic sclk = 1'b0, dclk = 1'b0, srst = 1'b1, drst = 1'b1;
  logic sv = 1'b0, busy, dv;
  logic [1:0] sd = '0, dd;
  int checks = 0, failures = 0;
  logic [1:0] q[$];
  int n_sent = 0, n_recv = 0, n_drop = 0;

  always #4 sclk = ~sclk;
  always #3.65 dclk = ~dclk;

  cdc_ctrl_sync #(.W(2), .STRETCH(4)) dut (
    .src_clk(sclk), .src_rst(srst), .src_valid_i(sv), .src_data_i(sd), .src_busy_o(busy),
    .dst_clk(dclk), .dst_rst(drst), .dst_valid_o(dv), .dst_data_o(dd));

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dclk) begin
    #0.1;
    if (dv) begin
      n_recv++;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected word"); end
      else if (dd !== q.pop_front()) begin failures++; $display("FAIL wrong word %b", dd); end
    end
  end

  initial begin
    repeat (3) @(posedge sclk);
    srst <= 1'b0; drst <= 1'b0;
    repeat (3) @(posedge sclk);
    for (int i = 0; i < 300; i++) begin
      logic [1:0] w;
      @(posedge sclk);
      #1;   // busy after this edge is what the source sees on the next one
      w = 2'($urandom);
      if ($urandom_range(0, 3) == 0) begin
        sv = 1'b1; sd = w;
        if (!busy) begin q.push_back(w); n_sent++; end
        else n_drop++;
      end else sv = 1'b0;
    end
    @(posedge sclk); sv <= 1'b0;
    repeat (20) @(posedge sclk);
    checks++;
    if (n_recv != n_sent || q.size() != 0 || n_drop == 0) begin
      failures++; $display("FAIL sent=%0d recv=%0d drop=%0d", n_sent, n_recv, n_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
