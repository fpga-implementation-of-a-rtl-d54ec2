`timescale 1ns/1ps
// tb_phase_aligner: the aligner's clock comes from a model of the clock
// manager's phase shift written here: 8 ns period, shifted by 50 ps per PSEN
// step, PSDONE 12 PSCLK cycles later. Random 125 Mbps data change at
// multiples of 8 ns, so the eye centre is 4 ns after a transition. Checks:
//   - while the frequency loop is not locked, no PSEN;
//   - from a clock 0.5 ns after the transitions the aligner starts stepping
//     later (PSINCDEC=1) and makes about 70 net steps, from 7.5 ns it steps
//     earlier; both end with the rising edge within 0.3 ns of the eye centre
//     (then it dithers around it, as a bang-bang loop does);
//   - after alignment the recovered data equal the sent data;
//   - PSEN is never raised again before PSDONE has answered.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_phase_aligner;
  localparam real STEP = 0.05;
  logic pa_clk = 1'b0, ps_clk = 1'b0, pa_rst = 1'b1, ps_rst = 1'b1;
  logic locked = 1'b0, data = 1'b0, rec, locked_pa, psen, psincdec, psdone = 1'b0;
  int checks = 0, failures = 0;
  real ps_off = 0.5;
  int n_inc = 0, n_dec = 0, pending = 0;
  bit first_inc;

  always #4 ps_clk = ~ps_clk;

  phase_aligner #(.WIN(32), .THRESH(4), .MIN_TRANS(4)) dut (
    .pa_clk(pa_clk), .pa_rst(pa_rst), .ps_clk(ps_clk), .ps_rst(ps_rst), .locked_i(locked),
    .data_i(data), .rec_data_o(rec), .locked_pa_o(locked_pa), .psen_o(psen),
    .psincdec_o(psincdec), .psdone_i(psdone));

  // Phase-shifted clock: rising edges at 8k + ps_off.
  initial begin
    longint k = 1;
    forever begin
      real t;
      t = 8.0 * k + ps_off;
      if (t > $realtime + 0.5) begin
        #(t - $realtime) pa_clk = 1'b1;
        #4 pa_clk = 1'b0;
      end
      k++;
    end
  end

  // Phase-shift port.
  always @(posedge ps_clk) begin
    psdone <= 1'b0;
    if (pending > 0) begin
      pending--;
      if (pending == 0) psdone <= 1'b1;
      checks++;
      if (psen) begin failures++; $display("FAIL PSEN before PSDONE"); end
    end else if (psen && !ps_rst) begin   // PSEN is unknown before reset
      if (n_inc == 0 && n_dec == 0) first_inc = psincdec;
      if (psincdec) begin ps_off += STEP; n_inc++; end
      else          begin ps_off -= STEP; n_dec++; end
      pending = 12;
    end
  end

  // Data, transitions at multiples of 8 ns; history for the data check.
  logic hist[$];
  initial begin
    forever begin
      #8 data = 1'($urandom);
      hist.push_back(data);
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (ps_off=%f inc=%0d dec=%0d)", what, ps_off, n_inc, n_dec); end
  endtask

  function automatic real centre_err();
    real p;
    p = ps_off;
    while (p < 0.0)  p += 8.0;
    while (p >= 8.0) p -= 8.0;
    return p - 4.0;
  endfunction

  initial begin
    repeat (4) @(posedge ps_clk);
    pa_rst <= 1'b0; ps_rst <= 1'b0;
    #20us;
    check(n_inc == 0 && n_dec == 0, "no steps while unlocked");
    locked = 1'b1;
    #60us;
    check(first_inc && n_inc - n_dec >= 66 && n_inc - n_dec <= 74, "clock early: net 70 steps later");
    check(centre_err() < 0.3 && centre_err() > -0.3, "aligned to the eye centre from 0.5 ns");
    locked = 1'b0;
    #2us;
    ps_off = 7.5; n_inc = 0; n_dec = 0;
    locked = 1'b1;
    #60us;
    check(!first_inc && n_dec - n_inc >= 66 && n_dec - n_inc <= 74, "clock late: net 70 steps earlier");
    check(centre_err() < 0.3 && centre_err() > -0.3, "aligned to the eye centre from 7.5 ns");
    // Recovered data: compare a stretch of rec with the sent history.
    begin
      int best = 0;
      logic r[$];
      repeat (200) begin @(posedge pa_clk); #0.1; r.push_back(rec); end
      // find the alignment of r inside the end of hist
      for (int lag = 0; lag < 8; lag++) begin
        int ok;
        ok = 0;
        for (int i = 0; i < 190; i++)
          if (r[i] === hist[hist.size() - 200 - lag + i]) ok++;
        if (ok > best) best = ok;
      end
      check(best == 190, $sformatf("recovered data match (%0d of 190)", best));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
