`timescale 1ns/1ps
// tb_cdr_top_full: one complete acquisition with the core at its default
// size (32-bit NCO, step of about 0.95 ppm, filter windows of 1024 bits,
// manager window of 1024 filter windows, about 8.4 ms). PRBS-7 data arrive
// 40 ppm faster than the nominal 125 Mbps. The frequency loop must only
// raise the NCO frequency, lock within 30 ppm of the data rate, and the
// recovered data must then be error-free once the phase aligner has
// centred the clock. About 0.2 s of operation is simulated.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_cdr_top_full;
  localparam real FREQ_PPM = 40.0;

  logic sys_clk = 1'b0, ser_clk = 1'b0, rst = 1'b1, data = 1'b0;
  logic nco_clk, rec_clk, rec_data, locked, prbs_tx;
  logic [31:0] jump, err_cnt;
  logic [47:0] bit_cnt;
  int checks = 0, failures = 0;
  real bit_period = 8.0 / (1.0 + FREQ_PPM * 1e-6);

  always #4.0 sys_clk = ~sys_clk;
  always #1.0 ser_clk = ~ser_clk;

  cdr_top dut (
    .sys_clk(sys_clk), .ser_clk(ser_clk), .rst(rst), .data_i(data),
    .nco_clk_o(nco_clk), .nco_clk_lb_i(nco_clk), .rec_clk_o(rec_clk),
    .rec_data_o(rec_data), .locked_o(locked), .jump_o(jump),
    .prbs_err_cnt_o(err_cnt), .prbs_bit_cnt_o(bit_cnt),
    .prbs_tx_o(prbs_tx)
  );

  logic [6:0] lfsr = 7'h3C;
  // Edge times are accumulated as reals so that sub-picosecond rate offsets
  // are not lost to the 1 ps time precision.
  real t_edge = 0.0;
  initial begin
    forever begin
      t_edge += bit_period;
      #(t_edge - $realtime);
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      data = lfsr[0];
    end
  end

  int n_inc = 0, n_dec = 0, n_ps = 0, n_up = 0, n_down = 0, n_qv = 0, n_win = 0;
  // Count only once the I domain is out of reset (its flops start undefined).
  always @(posedge dut.clk_i) if (!dut.rst_i && !dut.rst_async) begin
    if (dut.u_pfd.shift_up_o) n_up++;
    if (dut.u_pfd.shift_down_o) n_down++;
    if (dut.u_pfd.u_fd_unit.q_valid) n_qv++;
    if (dut.u_pfd.win_end) n_win++;
    if (dut.freq_inc) n_inc++;
    if (dut.freq_dec) n_dec++;
  end
  always @(posedge sys_clk) if (!rst && dut.psen) n_ps++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ppm_err;
  int  e0, b0;
  initial begin
    repeat (20) @(posedge sys_clk);
    rst <= 1'b0;
    fork
      begin wait (locked === 1'b1); end
      begin #350ms; end
    join_any
    disable fork;
    ppm_err = (real'(jump) / real'(32'h4000_0000) - (1.0 + FREQ_PPM * 1e-6)) * 1e6;
    $display("lock after %0.1f ms: jump=%0d (%0.1f ppm from the data rate), %0d increase requests",
             $realtime / 1e6, jump, ppm_err, n_inc);
    $display("windows=%0d quadrants=%0d up=%0d down=%0d", n_win, n_qv, n_up, n_down);
    check(locked === 1'b1, "locked");
    check(n_inc > 0 && n_dec == 0, "only increase requests");
    check(ppm_err < 30.0 && ppm_err > -30.0, "NCO within 30 ppm of the data rate");
    #100us;
    e0 = int'(err_cnt); b0 = int'(bit_cnt);
    #200us;
    $display("BER window: %0d bits, %0d errors, %0d phase steps", bit_cnt - b0, err_cnt - e0, n_ps);
    check(bit_cnt - b0 > 20000, "recovered bits counted");
    check(err_cnt == e0, "no PRBS errors");
    check(n_ps > 0, "phase aligner active");
    check(locked === 1'b1, "still locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
