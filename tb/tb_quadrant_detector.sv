`timescale 1ns/1ps
// tb_quadrant_detector: all combinations of the two filtered decisions. Both
// decided -> the quadrant of the table (I late/Q late = 0, late/early = 1,
// early/early = 2, early/late = 3) and q_valid one cycle later; any undecided
// or invalid input -> no q_valid and the old quadrant kept.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_quadrant_detector;
  import cdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  pd_dec_t di, dq;
  logic qv;
  quadrant_e q;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  quadrant_detector dut (.clk(clk), .rst(rst), .dec_i(di), .dec_q(dq), .q_valid_o(qv), .quad_o(q));

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pd_dec_t mk(input int code); // 0 none,1 early,2 late,3 invalid
    pd_dec_t d;
    d.valid = (code != 3);
    d.early = (code == 1);
    d.late  = (code == 2);
    return d;
  endfunction

  quadrant_e last;
  initial begin
    di = '0; dq = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    last = QUAD_0;
    for (int r = 0; r < 50; r++) begin
      int ci, cq;
      bit ok;
      quadrant_e exp_q;
      ci = $urandom_range(0, 3); cq = $urandom_range(0, 3);
      @(posedge clk);
      di <= mk(ci); dq <= mk(cq);
      @(posedge clk);
      di <= '0; dq <= '0;
      #1;
      ok = (ci == 1 || ci == 2) && (cq == 1 || cq == 2);
      if (ci == 2 && cq == 2) exp_q = QUAD_0;
      else if (ci == 2 && cq == 1) exp_q = QUAD_1;
      else if (ci == 1 && cq == 1) exp_q = QUAD_2;
      else exp_q = QUAD_3;
      if (!ok) exp_q = last;
      checks++;
      if (qv !== ok || q !== exp_q) begin
        failures++;
        $display("FAIL ci=%0d cq=%0d qv=%b q=%0d exp %b %0d", ci, cq, qv, q, ok, exp_q);
      end
      last = exp_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
