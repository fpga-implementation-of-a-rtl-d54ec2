# NCO-based clock and data recovery (CDR) in SystemVerilog

This is a digital CDR for a 125 Mbps serial link that runs on the general-purpose I/O of a Xilinx 7-series FPGA. It is built for the JUNO front-end electronics link.

There is no analog PLL locked to the data. Instead:

- A numerically controlled oscillator (NCO) synthesises a clock from the local 125 MHz reference.
- The clock manager (MMCM) cleans that clock up and derives the sampling clocks from it.
- A phase and frequency detector steers the NCO frequency.
- A phase aligner slides the sampling clock into the middle of the data eye, using the MMCM's dynamic phase shift.

The RTL is in `rtl/` and the self-checking testbenches are in `tb/`. The top level is `cdr_top`.

## Block diagram

```
             +------------------ sys_clk domain (125 MHz, f_C) ------------------+
  jump M --> | freq_manager --M--> nco --8 bits--> oserdese2_model (8:1 DDR)     |--> nco_clk_o
             |      ^                                 ser_clk = 500 MHz          |     (PCB loop-back)
             |      | inc/dec        PS controller (in phase_aligner) --PSEN-->  |
             +------|---------------------------------------------|------------+
                    | cdc_ctrl_sync                                |
  nco_clk_lb_i --> mmcme2_model --CLKOUT0 = I_CLK--+               |
                        |        --CLKOUT1 = Q_CLK-+--> pfd (I_CLK domain)
                        |                                 pd_unit -> fd_unit -> pfd_manager
                        +--------CLKOUT2 (phase shifted) = rec_clk_o
                                   phase_aligner (BB PD + filter) --> rec_data_o --> prbs_checker
```

Module hierarchy:

- `cdr_top`
  - `freq_manager`
  - `nco`
  - `oserdese2_model`
  - `mmcme2_model`
  - `rst_sync` (one each for the I, PA and system domains)
  - `pfd`
    - `pd_unit`
      - `bb_phase_detector` (one on I_CLK, one on Q_CLK)
      - `pd_filter_master`
      - `pd_filter_slave` (two)
    - `fd_unit`
      - `quadrant_detector`
      - `quadrant_shift_detector`
    - `pfd_manager`
  - `cdc_ctrl_sync` (frequency requests, I_CLK to sys_clk)
  - `sync_2ff` (lock flag)
  - `phase_aligner`
    - `bb_phase_detector`
    - filter
    - `cdc_ctrl_sync`
    - PS controller
  - `prbs_checker`
  - `prbs_gen` (the transmit pattern, beside the CDR)

Shared types live in `cdr_pkg`:

- `pd_dec_t`: the filtered decision {valid, early, late}.
- `quadrant_e`: the quadrant.
- `pct_of()`: the threshold arithmetic.

## The NCO (`nco.sv`): the part to understand first

A phase accumulator of N = `ACC_W` = 32 bits adds the jump size M on every reference clock. A clock needs a phase-to-amplitude table of only one bit: half the circle is 1 and the other half is 0.

With one accumulator, the output edges could only fall on the 8 ns reference grid. The design gets 1 ns edge resolution with PW = 8 parallel phase wheels:

- Wheel k evaluates `acc + k*offset`, where `offset = round(M/PW)`.
- So the 8 table outputs are the waveform at 8 instants spaced 1 ns apart.
- The OSERDESE2 sends them, bit 0 first, at 1 Gbps, using a 500 MHz DDR clock.

The multiplication generic `G_MULT` scales the phase by 2^(G_MULT-1) before the table. It does this simply by reading accumulator bit `N-G_MULT` instead of the MSB. This gives:

```
f_out = M * f_C / 2^N * 2^(G_MULT-1),   rule: M * f_C / 2^N < f_C / 2   (M < 2^(N-1))
```

At the defaults (f_C = 125 MHz, G_MULT = 3) the nominal M = 2^30 gives 125 MHz. The rule is met: 31.25 MHz < 62.5 MHz.

- One LSB of M is 0.47 ppb.
- The frequency step `M_STEP` = 1024 is 0.95 ppm.
- The rounding of `offset` moves wheel k by at most k*PW/2 LSB, which is far below one 1 ns point at N = 32.
- `freq_manager` clamps M to [8, 2^31-1], so that both M >= PW and the rule always hold.

The serialised clock has 1 ns edge jitter, because its edges sit on the 1 ns grid. The MMCM filters this out.

## Frequency detection with two quadrature clocks

### Phase detectors

`bb_phase_detector` is an Alexander bang-bang detector:

- A = the sample at the rising edge; T = the sample at the falling edge.
- When two successive A samples differ, T tells on which side of the falling edge the transition was.
- T equal to the older bit means the clock is early. T equal to the newer bit means it is late.

The outputs come from one transition flag and one direction flag. This makes "early and late together" impossible by construction, and an assertion checks it.

### Filters

The detectors run on I_CLK and on Q_CLK; Q_CLK leads I_CLK by 90 degrees. Their pulses go through a filter pair:

- `pd_filter_master` sets a window of `FILT_WIN` = 1024 I_CLK cycles.
- Each `pd_filter_slave` counts +1 on late and -1 on early, and counts transitions.
- At the end of the window it gives a decision only if both of these hold:
  - |count| > `FILT_TH` = 128;
  - transitions >= `FILT_MIN` = 64.
- Otherwise the window is undecided.

The Q-side pulses are re-registered onto I_CLK. Both clocks come from the same MMCM, with a fixed 2 ns offset, so both slaves share one window.

### Quadrants

The pair of decisions tells which quarter of the clock period the data edges lie in (`quadrant_detector`):

| I decision | Q decision | quadrant |
|------------|------------|----------|
| late       | late       | Q0       |
| late       | early      | Q1       |
| early      | early      | Q2       |
| early      | late       | Q3       |

`quadrant_shift_detector` compares each new quadrant with the previous one:

- +1 (mod 4) is an "up" shift: f_NCO > f_d.
- -1 is a "down" shift: f_NCO < f_d.
- A jump of two quadrants carries no direction and is ignored.
- The first quadrant after reset only initialises the detector.

The detector can follow at most one quadrant per filter window. This limits the capture range to 90 degrees per 1024 bits, about ±244 ppm.

## PFD manager: lock, activate, unlock (`pfd_manager.sv`)

Single quadrant shifts are noisy near quadrant borders, so they are not used directly. The manager sums them over `MGR_WIN` = 1024 filter windows (about 8.4 ms):

- A down shift votes +1 (increase).
- An up shift votes -1 (decrease).

The maximum magnitude of the sum is `MGR_WIN`, and the three thresholds are percentages of it:

| threshold | default | on the sum | drift at 125 Mbps |
|-----------|---------|------------|-------------------|
| lock      | 10 %    | 102        | about 24 ppm      |
| activate  | 50 %    | 512        | about 122 ppm     |
| unlock    | 90 %    | 921        | about 220 ppm     |

At each manager window end:

- **Unlocked:** request sign(sum) if the sum is not zero, and assert the lock flag if |sum| <= lock.
- **Locked:** request only if |sum| > activate, and drop the lock flag if |sum| > unlock.

Because the window is long, a noise burst or a run of data without transitions cannot unlock the CDR. A burst only produces undecided windows, and those cast no vote. The price is a slow lock: in simulation, a 40 ppm offset at full size locks after 19 requests in 159 ms.

The requests reach `freq_manager` in the sys_clk domain through `cdc_ctrl_sync`:

- The source holds the 2-bit word and a strobe for `STRETCH` cycles, then waits `STRETCH` cycles.
- The destination synchronises the strobe in two flops and samples the stable word on the strobe's edge.

## Phase aligner (`phase_aligner.sv`)

After the frequency lock, a residual frequency error of up to the activate band remains. The frequency loop only moves in 0.95 ppm steps, and only when the sum exceeds 50 %.

The phase aligner removes that drift and centres the sampling:

1. A second bang-bang detector runs on the MMCM's phase-shifted output (`rec_clk_o`).
2. Its pulses are filtered over `PA_WIN` = 32 bits, with threshold 4 and minimum 4 transitions.
3. Each decided window becomes a phase step:
   - early → `PSINCDEC=1`, which delays the clock;
   - late → `PSINCDEC=0`.
4. The step request crosses into the PSCLK (sys_clk) domain.
5. There a two-state controller (`PS_IDLE`/`PS_WAIT`) pulses PSEN and waits for PSDONE before the next step.

Aligning the falling edge to the transitions puts the rising edge, the sampling point, in the middle of the eye. The rising-edge sample is the recovered data.

The slew limit is one 17.86 ps step per 256 ns window, which is about 70 ppm. That covers the lock band (24 ppm) with margin, but not the whole activate band (122 ppm). Sampling errors can therefore appear if the data rate drifts slowly by more than about 70 ppm, until the next frequency request. The gap can be narrowed in two ways:

- Lower `ACT_PCT`.
- Shorten `PA_WIN`.

## Clock domains and reset

| domain  | clock                      | contents |
|---------|----------------------------|----------|
| system  | `sys_clk`, `ser_clk`       | freq_manager, nco, serializer, PS controller |
| I       | I_CLK (Q_CLK for the Q detector front end) | pfd |
| PA      | CLKOUT2 = `rec_clk_o`      | phase_aligner detector, prbs_checker |

`rst` is active high and synchronous to `sys_clk`.

The I, PA and system-side receivers of the crossings get a reset from `rst_sync`:

- It is asserted asynchronously and released synchronously.
- It is held while the MMCM is not locked.

The receiving side of a crossing is therefore reset whenever its sending side is. The lock flag is synchronised into the system domain and masked during reset.

## Behavioural models of vendor tiles

`oserdese2_model` and `mmcme2_model` stand for the Xilinx OSERDESE2 and MMCME2_ADV primitives. They are not synthesisable; the synthesis flow reports a failure for them and for the top that contains them. For an FPGA build, replace them with the device primitives.

The OSERDESE2 model:

- Has 8:1 DDR with D[0] first.
- Does not model the primitive's latency.

The MMCME2_ADV model:

- Tracks CLKIN1 like a first-order PLL: period averaging with factor 1/16, phase correction with gain 1/8. This smooths the 1 ns NCO edge grid.
- Produces I, Q (+90 degrees) and a shifted copy.
- Moves the shifted copy by 17.857 ps per PSEN (1/56 of a 1 GHz VCO period).
- Answers PSDONE after 12 PSCLK cycles.
- Handles a phase shift that crosses a whole period by dropping or adding one output pulse, so the shifted clock never glitches.

## Test pattern

- `prbs_gen`: PRBS-7 (x^7 + x^6 + 1, seed all ones), one bit per sys_clk cycle on `prbs_tx_o`. This is what the transmitting board sends.
- `prbs_checker`: self-synchronising. It predicts each bit from the previous seven received bits, so one wrong bit counts three errors.
  - The 32-bit error counter and 48-bit bit counter run while the PA domain sees lock.
  - 48 bits is enough for the 3·10^12 bits needed for BER < 10^-12 at 95 % confidence, which is 400 minutes at 125 Mbps.

## Parameters of `cdr_top`

| parameter | default | meaning | origin |
|-----------|---------|---------|--------|
| ACC_W | 32 | accumulator width N | own choice |
| PW | 8 | phase wheels / serializer width | source design |
| G_MULT | 3 | frequency multiplication generic | chosen to meet the f_out rule at 125 MHz |
| M_INIT | 2^30 | start jump size (125 MHz) | follows from the above |
| M_STEP | 1024 | jump change per request (0.95 ppm) | own choice |
| FILT_WIN / FILT_TH / FILT_MIN | 1024 / 128 / 64 | PD filter window, threshold, minimum transitions | own choice |
| MGR_WIN | 1024 | manager window in filter windows | own choice |
| LOCK_PCT / ACT_PCT / UNLOCK_PCT | 10 / 50 / 90 | manager thresholds | source design |
| PA_WIN / PA_TH / PA_MIN | 32 / 4 / 4 | phase aligner filter | own choice |
| CDC_STRETCH | 4 | strobe stretch of the request crossings | own choice |
| PS_STEP_NS | 0.017857 | MMCM phase step | 7-series MMCM data sheet value |

For the 250 Mbps out-of-specification operation, set G_MULT = 4; M_INIT stays 2^30. M = 2^31 with G_MULT = 3 would break the f_out rule. The serializer then runs at 1 Gbps, which is below the 1250 Mbps limit of the OSERDESE2.

## Verification

Each block has `tb/tb_<module>.sv`. Every testbench:

- drives random stimulus (`$urandom`);
- compares against an independent model or hand-computed expectations;
- has a watchdog;
- prints `TB_RESULT checks=.. failures=..`.

The testbenches simulate with Verilator (`--binary --timing`), with uninitialised state randomised.

`tb_cdr_top` uses reduced windows, so the frequency and phase loops settle in about 0.3 s of simulated time. It covers:

- the frequency lock from +600 ppm;
- error-free recovered data;
- an interference burst and a long run of zeros without losing lock;
- a −400 ppm data-rate step that unlocks and relocks the loop;
- the transmit PRBS pattern;
- counts of every mechanism: increase and decrease requests, up and down quadrant shifts, lock and unlock events, phase steps both ways, and request crossings.

`tb_cdr_top_full` runs the top at its default (full) size with data 40 ppm fast:

- It checks that only increase requests are issued.
- It checks that lock is reached within 30 ppm.
- It checks 25 000 recovered bits with no errors while the phase aligner keeps stepping.
- It takes about 1.5 minutes of simulation.

`tb_cdr_top_250` runs the same full-size acquisition at 250 Mbps with G_MULT = 4:

- lock after 18 requests, within 30 ppm;
- 50 000 error-free bits.

The data sources in the top-level testbenches accumulate edge times as reals, because ppm offsets are below the 1 ps time resolution.

## Not implemented

These are outside the FPGA logic and are represented only by top-level ports:

- the cable equalizer and cable driver chips;
- the local oscillator and clock tile that produce `sys_clk` and `ser_clk`;
- the PCB loop-back trace from `nco_clk_o` to `nco_clk_lb_i`.

Also left out:

- The debug logic analyser core used to read the counters; the counters are top-level outputs.
- The Manchester/Hamming coding of the existing JUNO synchronous link protocol, which is mentioned only as background.

Known limitations:

- The real-hardware lock times of several seconds are not reproduced. Simulation at full size only shows a lock from a small offset.
- The 3·10^12-bit BER run is far beyond simulation. Only about 25 000 bits are checked at full size.
