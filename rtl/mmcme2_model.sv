`timescale 1ns/1ps
// mmcme2_model: behavioural model (not synthesizable logic) of the FPGA
// clock management tile with dynamic phase shift. The real part is a vendor
// analog/digital PLL; this model only reproduces what the CDR relies on.
//
// The NCO clock arrives on CLKIN1 with edges quantised to the serializer bit
// period. The model tracks it like a first-order PLL: the period is a running
// average of the measured input periods, and a reference edge advances by one
// period per input edge and is pulled towards the real input edge by
// TRACK_GAIN of the phase error. From the reference edge, one period later,
// it produces
//   CLKOUT0  in-phase clock I_CLK, 50 % duty cycle
//   CLKOUT1  quadrature clock Q_CLK, leading CLKOUT0 by 90 degrees
//   CLKOUT2  copy of CLKOUT0 delayed by the dynamic phase shift
// Dynamic phase shift: a PSEN pulse (one PSCLK cycle) moves CLKOUT2 by
// +PS_STEP_NS (PSINCDEC=1, later) or -PS_STEP_NS (PSINCDEC=0); PSDONE pulses
// for one PSCLK cycle PS_LATENCY PSCLK cycles later. The real tile's step is
// 1/56 of the VCO period (17.86 ps for a 1 GHz VCO). LOCKED rises after
// LOCK_EDGES input edges; RST (sampled on CLKIN1) restarts the count and
// clears LOCKED.
//
// Source design: I and Q clocks 90 degrees apart and a dynamically phase-
// shifted clock from the vendor tile. Own choices: the tracking law, the
// lock count and the modelled step and latency figures.
module mmcme2_model #(
  parameter real PS_STEP_NS  = 0.017857,
  parameter real TRACK_GAIN  = 0.125,
  parameter int  LOCK_EDGES  = 32,
  parameter int  PS_LATENCY  = 12
) (
  input  logic CLKIN1,
  input  logic RST,
  input  logic PSCLK,
  input  logic PSEN,
  input  logic PSINCDEC,
  output logic CLKOUT0,
  output logic CLKOUT1,
  output logic CLKOUT2,
  output logic PSDONE,
  output logic LOCKED
);
  real t_prev;
  real t_ref;
  real period;
  int  n_edges;
  int  ps_steps;
  int  ps_wait;
  real ps_prev;

  initial begin
    t_prev   = 0.0;
    t_ref    = 0.0;
    period   = 0.0;
    n_edges  = 0;
    ps_steps = 0;
    ps_wait  = 0;
    ps_prev  = 0.0;
    CLKOUT0 = 1'b0;
    CLKOUT1 = 1'b0;
    CLKOUT2 = 1'b0;
    PSDONE  = 1'b0;
    LOCKED  = 1'b0;
  end

  always @(posedge CLKIN1) begin
    real t;
    t = $realtime;
    if (RST) begin
      n_edges = 0;
      LOCKED  = 1'b0;
    end else begin
      if (n_edges == 0) begin
        t_ref = t;
      end else if (n_edges == 1) begin
        period = t - t_prev;
        t_ref  = t;
      end else begin
        period = period + (t - t_prev - period) / 16.0;
        t_ref  = t_ref + period;
        t_ref  = t_ref + (t - t_ref) * TRACK_GAIN;
      end
      t_prev = t;
      if (n_edges < LOCK_EDGES) n_edges = n_edges + 1;
      else LOCKED = 1'b1;
      if (n_edges >= 3) begin
        real base, half, ps_off;
        int  n_pa;
        base   = t_ref - t + period;
        half   = period / 2.0;
        // The shift is kept modulo one period. When it wraps, the edge that
        // belongs to this input cycle has moved into the next one (upwards:
        // schedule nothing now) or the previous one (downwards: schedule it
        // in addition), so CLKOUT2 never loses or gains a pulse - as in the
        // real tile, where the phase shift is continuous.
        ps_off = ps_steps * PS_STEP_NS;
        while (ps_off >= period) ps_off = ps_off - period;
        while (ps_off < 0.0)     ps_off = ps_off + period;
        n_pa = 1;
        if (ps_off - ps_prev < -0.5 * period) n_pa = 0;
        if (ps_off - ps_prev >  0.5 * period) n_pa = 2;
        ps_prev = ps_off;
        fork
          begin
            automatic real d = base;
            automatic real h = half;
            #(d) CLKOUT0 = 1'b1;
            #(h) CLKOUT0 = 1'b0;
          end
          begin
            automatic real d = base - period / 4.0;
            automatic real h = half;
            #(d) CLKOUT1 = 1'b1;
            #(h) CLKOUT1 = 1'b0;
          end
          begin
            automatic real d = base + ps_off;
            automatic real h = half;
            automatic int  n = n_pa;
            if (n == 2) begin
              #(d - 2.0 * h) CLKOUT2 = 1'b1;
              #(h)           CLKOUT2 = 1'b0;
              #(h)           CLKOUT2 = 1'b1;
              #(h)           CLKOUT2 = 1'b0;
            end else if (n == 1) begin
              #(d) CLKOUT2 = 1'b1;
              #(h) CLKOUT2 = 1'b0;
            end
          end
        join_none
      end
    end
  end

  // Dynamic phase-shift port.
  always @(posedge PSCLK) begin
    PSDONE <= 1'b0;
    if (ps_wait > 0) begin
      ps_wait = ps_wait - 1;
      if (ps_wait == 0) PSDONE <= 1'b1;
    end else if (PSEN) begin
      ps_steps = PSINCDEC ? ps_steps + 1 : ps_steps - 1;
      ps_wait  = PS_LATENCY;
    end
  end
endmodule
