`timescale 1ns/1ps
// tb_prbs_gen: the generated sequence must obey b[n] = b[n-7] xor b[n-6]
// (x^7 + x^6 + 1), repeat with period 127 and hold 64 ones per period, and
// the generator must hold its state while en is low.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_prbs_gen;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, b;
  int checks = 0, failures = 0;
  logic s[$];

  always #4 clk = ~clk;

  prbs_gen dut (.clk(clk), .rst(rst), .en(en), .bit_o(b));

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    repeat (2) @(posedge clk);
    rst <= 1'b0; en <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      @(posedge clk); #1;
      s.push_back(b);
      if (i % 50 == 49) begin
        logic held;
        en <= 1'b0; held = b;
        repeat (3) @(posedge clk);
        #1; checks++;
        if (b !== held) begin failures++; $display("FAIL output moved while disabled"); end
        en <= 1'b1;
      end
    end
    for (int n = 7; n < s.size(); n++) begin
      checks++;
      if (s[n] !== (s[n-7] ^ s[n-6])) begin failures++; if (failures < 5) $display("FAIL recurrence at %0d", n); end
    end
    for (int n = 0; n + 127 < s.size(); n++) begin
      checks++;
      if (s[n] !== s[n+127]) begin failures++; if (failures < 5) $display("FAIL period at %0d", n); end
    end
    ones = 0;
    for (int n = 0; n < 127; n++) ones += s[n];
    checks++;
    if (ones != 64) begin failures++; $display("FAIL %0d ones", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
