`timescale 1ns/1ps
// tb_freq_manager: default size (32-bit jump, step 1024). After reset the
// jump is 2^30 (125 MHz from a 125 MHz reference with factor 3); random
// increase/decrease pulses must move it by exactly one step each, one cycle
// later; simultaneous pulses do nothing; the limits M_MIN and M_MAX hold.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_freq_manager;
  localparam longint STEP = 1024;
  logic clk = 1'b0, rst = 1'b1, inc = 1'b0, dec = 1'b0;
  logic [31:0] jump;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  freq_manager dut (.clk(clk), .rst(rst), .inc_i(inc), .dec_i(dec), .jump_o(jump));

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    m = 64'd1 << 30;
    checks++;
    if (jump !== 32'(m)) begin failures++; $display("FAIL reset value %h", jump); end
    for (int i = 0; i < 500; i++) begin
      bit a, b;
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk); inc <= a; dec <= b;
      @(posedge clk); inc <= 1'b0; dec <= 1'b0; #1;
      if (a && !b) m += STEP;
      if (b && !a) m -= STEP;
      checks++;
      if (jump !== 32'(m)) begin failures++; $display("FAIL %0d: jump %0d exp %0d", i, jump, m); end
    end
    // Upper limit: 2^31 - 1.
    rst <= 1'b1; @(posedge clk); rst <= 1'b0;
    for (int i = 0; i < (1 << 20) + 10; i++) begin @(posedge clk); inc <= 1'b1; end
    @(posedge clk); inc <= 1'b0; @(posedge clk); #1;
    checks++;
    if (jump !== 32'h7FFF_FFFF) begin failures++; $display("FAIL upper limit %h", jump); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
