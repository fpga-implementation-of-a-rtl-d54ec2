`timescale 1ns/1ps
// tb_cdr_top: end-to-end test of the clock and data recovery core.
//
// A PRBS-7 source sends 125 Mbps data whose bit period first differs from
// the NCO's nominal 8 ns by +600 ppm, later by the plusarg STEP (default
// -400 ppm). The serializer output is looped back to the
// clock manager input (the PCB loop-back). The test runs the core at reduced
// window sizes and a coarser NCO (20-bit accumulator) so that acquisition
// takes a few hundred milliseconds of simulated time, and checks
//   - the frequency loop issues requests in the right direction and locks,
//   - the NCO jump size ends near the value that matches the data rate,
//   - the phase aligner steps the recovered clock,
//   - after lock the PRBS checker sees no errors over many bits,
//   - a burst of corrupted bits (interference) and a long run without
//     transitions do not clear the lock flag,
//   - a large frequency step of the data clears the lock flag, and the loop
//     locks again near the new rate,
//   - the transmit pattern generator follows x^7+x^6+1.
// The expected jump sizes are computed here from the data rate, not taken
// from the design.
// Each of these mechanisms is counted and must happen at least once.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_cdr_top;
  localparam int unsigned ACC_W    = 20;
  localparam logic [ACC_W-1:0] M_NOM = ACC_W'(1) << (ACC_W - 2);
  localparam int unsigned M_STEP   = 16;        // 61 ppm per request
  localparam real         FREQ_PPM = 600.0;     // data faster than nominal

  logic sys_clk = 1'b0, ser_clk = 1'b0, rst = 1'b1;
  logic data = 1'b0;
  logic nco_clk, rec_clk, rec_data, locked, prbs_tx;
  logic [ACC_W-1:0] jump;
  logic [31:0] err_cnt;
  logic [47:0] bit_cnt;

  int checks = 0, failures = 0;
  real bit_period = 8.0 * (1.0 - FREQ_PPM * 1e-6);
  bit  corrupt = 1'b0, hold_data = 1'b0;

  always #4.0 sys_clk = ~sys_clk;
  always #1.0 ser_clk = ~ser_clk;

  cdr_top #(
    .ACC_W(ACC_W), .M_INIT(M_NOM), .M_STEP(ACC_W'(M_STEP)),
    .FILT_WIN(256), .FILT_TH(8), .FILT_MIN(16), .MGR_WIN(16),
    .PA_WIN(16), .PA_TH(2), .PA_MIN(2)
  ) dut (
    .sys_clk(sys_clk), .ser_clk(ser_clk), .rst(rst), .data_i(data),
    .nco_clk_o(nco_clk), .nco_clk_lb_i(nco_clk), .rec_clk_o(rec_clk),
    .rec_data_o(rec_data), .locked_o(locked), .jump_o(jump),
    .prbs_err_cnt_o(err_cnt), .prbs_bit_cnt_o(bit_cnt),
    .prbs_tx_o(prbs_tx)
  );

  // PRBS-7 source with its own bit clock.
  logic [6:0] lfsr = 7'h7F;
  // Edge times are accumulated as reals so that sub-picosecond rate offsets
  // are not lost to the 1 ps time precision.
  real t_edge = 0.0;
  initial begin
    forever begin
      t_edge += bit_period;
      #(t_edge - $realtime);
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      if (hold_data)      data = 1'b0;
      else if (corrupt)   data = lfsr[0] ^ ($urandom_range(0, 3) == 0);
      else                data = lfsr[0];
    end
  end

  // Mechanism counters.
  int n_inc = 0, n_dec = 0, n_lock = 0, n_unlock = 0, n_ps_inc = 0, n_ps_dec = 0;
  int n_up = 0, n_down = 0, n_cdc = 0;
  logic locked_q = 1'b0;
  // Count only once the I domain is out of reset (its flops start undefined).
  always @(posedge dut.clk_i) if (!dut.rst_i && !dut.rst_async) begin
    if (dut.freq_inc) n_inc++;
    if (dut.freq_dec) n_dec++;
    if (dut.u_pfd.shift_up_o) n_up++;
    if (dut.u_pfd.shift_down_o) n_down++;
    if (dut.locked_i && !locked_q) n_lock++;
    if (!dut.locked_i && locked_q) n_unlock++;
    locked_q <= dut.locked_i;
  end
  // Transmit pattern: every bit must equal x^7+x^6+1 applied to the last 7.
  logic [6:0] tx_hist;
  int n_tx = 0, n_tx_err = 0, n_tx_ones = 0;
  always @(posedge sys_clk) if (!rst) begin
    if (n_tx >= 8 && prbs_tx != (tx_hist[6] ^ tx_hist[5])) n_tx_err++;
    if (prbs_tx) n_tx_ones++;
    tx_hist <= {tx_hist[5:0], prbs_tx};
    n_tx++;
  end

  always @(posedge sys_clk) if (!rst) begin
    if (dut.psen &&  dut.psincdec) n_ps_inc++;
    if (dut.psen && !dut.psincdec) n_ps_dec++;
    if (!dut.rst_sys && dut.sys_req_valid) n_cdc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    #4ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real m_ideal, step_ppm;
  int  e0, b0, jump_at_lock;
  initial begin
    m_ideal = real'(M_NOM) / (1.0 - FREQ_PPM * 1e-6);
    repeat (20) @(posedge sys_clk);
    rst <= 1'b0;

    // Acquisition.
    fork
      begin wait (locked === 1'b1); end
      begin #1.5ms; end
    join_any
    disable fork;
    check(locked === 1'b1, "frequency loop locks");
    jump_at_lock = int'(jump);
    $display("lock at %0t ns: jump=%0d ideal=%0.1f inc=%0d dec=%0d", $time, jump, m_ideal, n_inc, n_dec);
    check(n_inc > 0 && n_dec == 0, "NCO too slow -> only increase requests");
    check(real'(jump) > real'(M_NOM), "jump size moved towards the data rate");
    check((real'(jump) - m_ideal) < 4.0 * M_STEP && (m_ideal - real'(jump)) < 4.0 * M_STEP,
          "jump size within 4 steps of the data rate");
    #1us;
    check(n_cdc == n_inc + n_dec, "every request crossed into the system domain");

    // Phase alignment settles, then error-free data.
    #20us;
    e0 = int'(err_cnt); b0 = int'(bit_cnt);
    #100us;
    $display("BER window: bits=%0d errors=%0d ps_inc=%0d ps_dec=%0d", bit_cnt - b0, err_cnt - e0, n_ps_inc, n_ps_dec);
    check(bit_cnt - b0 > 10000, "checker counted recovered bits");
    check(err_cnt == e0, "no PRBS errors after lock and alignment");
    check(n_ps_inc + n_ps_dec > 0, "phase aligner stepped the clock manager");

    // Interference burst: corrupted bits, lock must hold.
    corrupt = 1'b1; #5us; corrupt = 1'b0;
    check(locked === 1'b1, "lock survives an interference burst");
    check(err_cnt != e0, "interference was seen by the PRBS checker");

    // Transition-free data: lock and frequency must hold.
    hold_data = 1'b1; #50us; hold_data = 1'b0;
    check(locked === 1'b1, "lock survives transition-free data");
    #20us;
    e0 = int'(err_cnt);
    #30us;
    check(err_cnt == e0, "error-free again after the disturbances");

    // Frequency step of the data of about 950 ppm: the data edges now move by
    // almost one quadrant per filter window, beyond the unlock threshold.
    if (!$value$plusargs("STEP=%f", step_ppm)) step_ppm = -400.0;
    bit_period = 8.0 * (1.0 - step_ppm * 1e-6);
    $display("data rate step to %0.1f ppm", step_ppm);
    fork
      begin wait (locked === 1'b0); end
      begin #400us; end
    join_any
    disable fork;
    check(locked === 1'b0, "large frequency step clears the lock flag");

    // Re-acquisition at the new rate.
    m_ideal = real'(M_NOM) / (1.0 - step_ppm * 1e-6);
    fork
      begin wait (locked === 1'b1); end
      begin #1ms; end
    join_any
    disable fork;
    check(locked === 1'b1, "frequency loop locks again");
    $display("relock: jump=%0d ideal=%0.1f", jump, m_ideal);
    check((real'(jump) - m_ideal) < 4.0 * M_STEP && (m_ideal - real'(jump)) < 4.0 * M_STEP,
          "jump size within 4 steps of the new data rate");
    #20us;
    e0 = int'(err_cnt);
    #40us;
    check(err_cnt == e0, "error-free after re-acquisition");

    check(n_tx_err == 0 && n_tx_ones > n_tx / 3, "transmit PRBS-7 pattern");
    $display("mechanisms: inc=%0d dec=%0d up=%0d down=%0d lock=%0d unlock=%0d ps_inc=%0d ps_dec=%0d cdc=%0d",
             n_inc, n_dec, n_up, n_down, n_lock, n_unlock, n_ps_inc, n_ps_dec, n_cdc);
    check(n_inc > 0, "mechanism: frequency increase request");
    check(n_dec > 0, "mechanism: frequency decrease request");
    check(n_up > 0, "mechanism: quadrant shift up");
    check(n_down > 0, "mechanism: quadrant shift down");
    check(n_lock > 0, "mechanism: lock");
    check(n_unlock > 0, "mechanism: unlock");
    check(n_ps_inc > 0, "mechanism: phase shift later");
    check(n_ps_dec > 0, "mechanism: phase shift earlier");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
