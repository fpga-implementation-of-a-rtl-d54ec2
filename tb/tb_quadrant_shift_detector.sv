`timescale 1ns/1ps
// tb_quadrant_shift_detector: random quadrant sequences. Each new quadrant
// must give shift_up for +1 (mod 4), shift_down for -1, nothing for 0 or 2,
// and nothing for the very first quadrant after reset.
module tb_quadrant_shift_detector;
  import cdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1, qv = 1'b0;
  quadrant_e qi = QUAD_0;
  logic up, dn;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  quadrant_shift_detector dut (.clk(clk), .rst(rst), .q_valid_i(qv), .quad_i(qi),
                               .shift_up_o(up), .shift_down_o(dn));

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, cur, n_up = 0, n_dn = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    prev = -1;
    for (int r = 0; r < 200; r++) begin
      bit eu, ed;
      cur = $urandom_range(0, 3);
      @(posedge clk);
      qv <= 1'b1; qi <= quadrant_e'(cur);
      @(posedge clk);
      qv <= 1'b0;
      #1;
      eu = (prev >= 0) && (((cur - prev + 4) % 4) == 1);
      ed = (prev >= 0) && (((cur - prev + 4) % 4) == 3);
      checks++;
      if (up !== eu || dn !== ed) begin
        failures++; $display("FAIL %0d->%0d up=%b dn=%b", prev, cur, up, dn);
      end
      if (eu) n_up++;
      if (ed) n_dn++;
      prev = cur;
      @(posedge clk); #1;
      checks++;
      if (up || dn) begin failures++; $display("FAIL pulse longer than one cycle"); end
    end
    checks++;
    if (n_up == 0 || n_dn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
