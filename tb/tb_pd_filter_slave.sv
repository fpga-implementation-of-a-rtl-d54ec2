`timescale 1ns/1ps
// tb_pd_filter_slave: random early/late pulse trains with a chosen bias are
// fed to the slave filter (window 256, threshold 8, at least 24
// transitions). For every window the expected decision is computed here from
// the counted pulses and compared with dec_o; windows with few transitions
// and balanced windows must give no decision.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_pd_filter_slave;
  import cdr_pkg::*;
  localparam int WIN = 256, TH = 8, MT = 24;
  logic clk = 1'b0, rst = 1'b1, win_end = 1'b0, e = 1'b0, l = 1'b0;
  pd_dec_t dec;
  int checks = 0, failures = 0;
  int n_late_dec = 0, n_early_dec = 0, n_none = 0;

  always #4 clk = ~clk;

  pd_filter_slave #(.WIN(WIN), .THRESH(TH), .MIN_TRANS(MT)) dut (
    .clk(clk), .rst(rst), .win_end(win_end), .early_i(e), .late_i(l), .dec_o(dec));

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(input int p_trans, input int p_late);
    int cnt = 0, tr = 0;
    bit exp_l, exp_e;
    for (int c = 0; c < WIN; c++) begin
      bit t, isl;
      @(posedge clk);
      t   = ($urandom_range(0, 99) < p_trans);
      isl = ($urandom_range(0, 99) < p_late);
      e <= t && !isl; l <= t && isl; win_end <= (c == WIN - 1);
      if (t) begin tr++; cnt += isl ? 1 : -1; end
    end
    exp_l = (tr >= MT) && (cnt > TH);
    exp_e = (tr >= MT) && (cnt < -TH);
    @(posedge clk); e <= 1'b0; l <= 1'b0; win_end <= 1'b0;
    #1;
    checks++;
    if (!dec.valid || dec.late != exp_l || dec.early != exp_e) begin
      failures++;
      $display("FAIL tr=%0d cnt=%0d dec=%b exp l=%b e=%b", tr, cnt, dec, exp_l, exp_e);
    end
    if (exp_l) n_late_dec++; else if (exp_e) n_early_dec++; else n_none++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 10; i++) window(50, 90);
    for (int i = 0; i < 10; i++) window(50, 10);
    for (int i = 0; i < 10; i++) window(50, 50);
    for (int i = 0; i < 10; i++) window(6, 100);   // too few transitions, strong bias
    for (int i = 0; i < 20; i++) window(10, 70);   // near both limits
    checks++;
    if (n_late_dec == 0 || n_early_dec == 0 || n_none == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", n_late_dec, n_early_dec, n_none);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
