`timescale 1ns/1ps
// tb_mmcme2_model: feeds the clock manager model with an 8 ns clock whose
// edges are quantised to 1 ns around an average period of 8.004 ns (as the
// serialised NCO clock is) and checks that
//   - LOCKED rises,
//   - CLKOUT0 has the average input period and Q (CLKOUT1) leads it by 90
//     degrees,
//   - each PSEN step moves CLKOUT2 by PS_STEP_NS against CLKOUT0, PSDONE
//     answers after PS_LATENCY PSCLK cycles, and a shift of more than a full
//     period neither loses nor adds a pulse.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_mmcme2_model;
  localparam real STEP = 0.017857;
  logic clkin = 1'b0, rst = 1'b1, psclk = 1'b0, psen = 1'b0, psincdec = 1'b0;
  logic c0, c1, c2, psdone, locked;
  int checks = 0, failures = 0;

  always #4 psclk = ~psclk;

  mmcme2_model dut (
    .CLKIN1(clkin), .RST(rst), .PSCLK(psclk), .PSEN(psen), .PSINCDEC(psincdec),
    .CLKOUT0(c0), .CLKOUT1(c1), .CLKOUT2(c2), .PSDONE(psdone), .LOCKED(locked)
  );

  // Quantised input clock: ideal edge times rounded to 1 ns.
  initial begin
    real t_ideal;
    t_ideal = 0.0;
    forever begin
      real next_r;
      t_ideal = t_ideal + 8.004;
      next_r  = real'($rtoi(t_ideal + 0.5));
      #(next_r - $realtime) clkin = 1'b1;
      #4 clkin = 1'b0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real t0r[$], t1r[$], t2r[$];
  int n0 = 0, n2 = 0;
  always @(posedge c0) begin t0r.push_back($realtime); n0++; end
  always @(posedge c1) t1r.push_back($realtime);
  always @(posedge c2) begin t2r.push_back($realtime); n2++; end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real mean_offset(ref real a[$], ref real b[$], input int n);
    // mean of (a - nearest b) over the last n edges of a
    real s = 0.0;
    for (int i = a.size() - n - 1; i < a.size() - 1; i++) begin  // last edge may lack its partner
      real best = 1e9;
      foreach (b[j]) if ((a[i] - b[j]) * (a[i] - b[j]) < best * best) best = a[i] - b[j];
      s += best;
    end
    return s / n;
  endfunction

  real per, off_q, off2a, off2b;
  int cycles, n2_before, n0_before, tw;
  initial begin
    repeat (5) @(posedge psclk);
    rst = 1'b0;
    #10us;
    check(locked === 1'b1, "LOCKED after the lock count");
    per = (t0r[t0r.size()-1] - t0r[t0r.size()-1001]) / 1000.0;
    check(per > 8.002 && per < 8.006, $sformatf("CLKOUT0 period %f", per));
    off_q = mean_offset(t1r, t0r, 50);
    check(off_q > -2.01 * 1.0005 && off_q < -1.99, $sformatf("Q leads I by a quarter period (%f)", off_q));
    t2r.delete(); t0r.delete();
    #200ns;
    off2a = mean_offset(t2r, t0r, 20);
    // 20 steps later
    for (int i = 0; i < 20; i++) begin
      @(posedge psclk); psen <= 1'b1; psincdec <= 1'b1;
      @(posedge psclk); psen <= 1'b0;   // PSEN sampled here
      cycles = 0;
      #1;
      while (psdone !== 1'b1) begin @(posedge psclk); #1; cycles++; end
      check(cycles == 12, $sformatf("PSDONE latency %0d", cycles));
    end
    t2r.delete(); t0r.delete();
    #200ns;
    off2b = mean_offset(t2r, t0r, 20);
    check((off2b - off2a) > 20 * STEP - 0.01 && (off2b - off2a) < 20 * STEP + 0.01,
          $sformatf("20 steps moved CLKOUT2 by %f ns", off2b - off2a));
    // Shift down by more than one period: pulse count must match CLKOUT0.
    n0_before = n0; n2_before = n2;
    for (int i = 0; i < 600; i++) begin
      @(posedge psclk); psen <= 1'b1; psincdec <= 1'b0;
      @(posedge psclk); psen <= 1'b0;
      #1;
      while (psdone !== 1'b1) begin @(posedge psclk); #1; end
    end
    #100ns;
    tw = (n2 - n2_before) - (n0 - n0_before);
    // 580 net steps down = 10.36 ns, i.e. CLKOUT2 gains one pulse over CLKOUT0.
    check(tw == 1, $sformatf("CLKOUT2 gained %0d pulses for a -1.3 period shift", tw));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
