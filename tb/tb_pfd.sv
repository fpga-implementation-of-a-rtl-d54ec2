`timescale 1ns/1ps
// tb_pfd: the complete phase and frequency detector with I_CLK/Q_CLK at
// 8 ns and random data at a chosen rate (filter window 64, threshold 8,
// manager window 16 filter windows). Expected behaviour:
//   data 2000 ppm slower than the clock : edges drift up the quadrants,
//       only frequency decrease requests, not locked
//   data 2000 ppm faster                : only increase requests
//   data at the clock rate              : no shifts, lock after one window
//   locked, data 3000 ppm faster        : increase requests (above the 50 %
//       activate threshold) while the lock is kept (below 90 %).
module tb_pfd;
  import cdr_pkg::*;
  logic ci = 1'b0, cq = 1'b0, rst = 1'b1, data = 1'b0;
  logic inc, dec, locked, up, dn;
  quadrant_e quad;
  int checks = 0, failures = 0;
  real bit_period = 8.0;
  int n_inc = 0, n_dec = 0, n_up = 0, n_dn = 0;

  initial begin #2.0; forever #4 ci = ~ci; end
  initial begin       forever #4 cq = ~cq; end

  pfd #(.WIN(64), .THRESH(8), .MIN_TRANS(8), .MGR_WIN(16)) dut (
    .clk_i(ci), .clk_q(cq), .rst(rst), .data_i(data), .freq_inc_o(inc), .freq_dec_o(dec),
    .locked_o(locked), .quad_o(quad), .shift_up_o(up), .shift_down_o(dn));

  initial begin
    #0.5;
    forever begin #(bit_period); data = 1'($urandom); end
  end

  always @(posedge ci) begin
    if (inc) n_inc++;
    if (dec) n_dec++;
    if (up)  n_up++;
    if (dn)  n_dn++;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (inc=%0d dec=%0d up=%0d down=%0d locked=%b)", what, n_inc, n_dec, n_up, n_dn, locked);
    end
  endtask

  task automatic clear();
    n_inc = 0; n_dec = 0; n_up = 0; n_dn = 0;
  endtask

  localparam real MGR_NS = 16 * 64 * 8.0;   // one manager window
  initial begin
    repeat (4) @(posedge ci);
    rst <= 1'b0;
    bit_period = 8.0 * 1.002;
    #(MGR_NS); clear();
    #(6 * MGR_NS);
    check(n_up > 10 && n_dn == 0, "slow data: edges drift up");
    check(n_dec >= 5 && n_inc == 0, "slow data: decrease requests");
    check(locked === 1'b0, "slow data: not locked");
    bit_period = 8.0 / 1.002;
    #(MGR_NS); clear();
    #(6 * MGR_NS);
    check(n_dn > 10 && n_up == 0, "fast data: edges drift down");
    check(n_inc >= 5 && n_dec == 0, "fast data: increase requests");
    bit_period = 8.0;
    #(2 * MGR_NS); clear();
    #(3 * MGR_NS);
    check(locked === 1'b1, "matched rate: locked");
    check(n_inc == 0 && n_dec == 0, "matched rate: no requests");
    bit_period = 8.0 / 1.003;
    #(MGR_NS); clear();
    #(6 * MGR_NS);
    check(n_inc >= 3 && n_dec == 0, "locked, fast data: increase requests above activate");
    check(locked === 1'b1, "locked, fast data: lock kept below unlock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
