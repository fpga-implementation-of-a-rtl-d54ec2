`timescale 1ns/1ps
// cdr_pkg: types and helpers shared by the clock and data recovery (CDR) core.
// A filtered phase-detector decision is carried as a small struct; the clock
// quadrant in which the data edges lie is a 2-bit enum numbered in the
// direction of increasing phase (quadrant 0 starts at the rising edge of the
// in-phase clock I_CLK). Frequency requests are the +1 / -1 votes of the
// frequency detector.
//
// Own choice: the encodings; the quadrant numbering follows the four
// quadrants of the source design (Q0..Q3), the decision fields follow the
// early/late/undecided outcome of the filter.
package cdr_pkg;

  // Result of one phase-detector filter window. valid pulses once per window;
  // early/late are both 0 when the window gave no decision.
  typedef struct packed {
    logic valid;
    logic early;
    logic late;
  } pd_dec_t;

  // Position of the data transitions inside the I_CLK period.
  typedef enum logic [1:0] {
    QUAD_0 = 2'd0,   // 0..90 deg    : I late,  Q late
    QUAD_1 = 2'd1,   // 90..180 deg  : I late,  Q early
    QUAD_2 = 2'd2,   // 180..270 deg : I early, Q early
    QUAD_3 = 2'd3    // 270..360 deg : I early, Q late
  } quadrant_e;

  // Threshold as an integer percentage of a maximum count.
  function automatic int unsigned pct_of(input int unsigned maxv, input int unsigned pct);
    return (maxv * pct) / 100;
  endfunction

endpackage
