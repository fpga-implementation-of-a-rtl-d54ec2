`timescale 1ns/1ps
// tb_pd_filter_master: the window generator must pulse win_end for exactly
// one cycle every WIN cycles (default 1024), counting the cycle in which reset
// is released as the first of a window, and restart its count on reset.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_pd_filter_master;
  localparam int WIN = 1024;
  logic clk = 1'b0, rst = 1'b1, win_end;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  pd_filter_master dut (.clk(clk), .rst(rst), .win_end(win_end));

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int since, n_end;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    since = 1; n_end = 0;   // the release cycle itself is the first of the window
    for (int c = 0; c < 6 * WIN + 100; c++) begin
      @(posedge clk); #1;
      since++;
      if (win_end) begin
        checks++;
        if (since != WIN) begin failures++; $display("FAIL window length %0d", since); end
        since = 0; n_end++;
      end
      if (c == 3 * WIN + 17) begin
        rst <= 1'b1; @(posedge clk); rst <= 1'b0; #1; since = 1;
      end
    end
    checks++;
    if (n_end != 6) begin failures++; $display("FAIL %0d windows", n_end); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
