`timescale 1ns/1ps
// tb_fd_unit: drives the frequency detector with the filtered decisions that
// data edges produce while drifting steadily through the quadrants. A drift
// towards higher phase (0,1,2,3,0,...) must give one shift_up per quadrant
// change and no shift_down; the reverse drift the opposite; windows with an
// undecided detector (edges on a quadrant boundary) must be skipped without
// a false shift. Timing: shifts come two cycles after the decision.
module tb_fd_unit;
  import cdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  pd_dec_t di, dq;
  logic up, dn;
  quadrant_e q;
  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0;

  always #4 clk = ~clk;

  fd_unit dut (.clk(clk), .rst(rst), .dec_i(di), .dec_q(dq), .shift_up_o(up), .shift_down_o(dn), .quad_o(q));

  always @(posedge clk) begin
    if (up) n_up++;
    if (dn) n_dn++;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decisions of the two detectors for data edges at angle a (degrees).
  task automatic window_at(input int a, input bit undecided);
    pd_dec_t i_d, q_d;
    a = ((a % 360) + 360) % 360;
    i_d = '{valid: 1'b1, early: (a >= 180), late: (a < 180)};
    q_d = '{valid: 1'b1, early: (a >= 90 && a < 270), late: !(a >= 90 && a < 270)};
    if (undecided) q_d.early = 1'b0;
    if (undecided) q_d.late = 1'b0;
    @(posedge clk); di <= i_d; dq <= q_d;
    @(posedge clk); di <= '0; dq <= '0;
    repeat (4) @(posedge clk);
  endtask

  task automatic expect_counts(input int eu, input int ed, input string what);
    checks++;
    if (n_up != eu || n_dn != ed) begin
      failures++; $display("FAIL %s: up=%0d down=%0d expected %0d %0d", what, n_up, n_dn, eu, ed);
    end
    n_up = 0; n_dn = 0;
  endtask

  initial begin
    di = '0; dq = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // Upward drift, 30 degrees per window, starting at 45: 3 turns.
    for (int a = 45; a < 45 + 3 * 360; a += 30) window_at(a, 1'b0);
    // 36 windows cross 12 quadrant boundaries
    expect_counts(12, 0, "upward drift");
    for (int a = 45 + 3 * 360; a > 45; a -= 30) window_at(a, 1'b0);
    expect_counts(0, 12, "downward drift");
    // Upward drift with every third window undecided.
    for (int a = 45, n = 0; a < 45 + 2 * 360; a += 30, n++) window_at(a, (n % 3) == 2);
    expect_counts(7, 0, "upward drift with undecided windows");  // last window undecided
    // Edges staying inside one quadrant (the first window only re-starts it).
    window_at(200, 1'b0);
    n_up = 0; n_dn = 0;
    for (int n = 0; n < 10; n++) window_at(200, 1'b0);
    expect_counts(0, 0, "no drift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
