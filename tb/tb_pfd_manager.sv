`timescale 1ns/1ps
// tb_pfd_manager: manager window of 20 filter windows (thresholds 2, 10, 18).
// For every manager window a vote pattern with a known sum is applied and
// the locked flag and the request pulse at the window end are compared with
// the rules: unlocked -> request on any non-zero sum and lock at |sum| <= 2;
// locked -> request above 10, unlock above 18.
module tb_pfd_manager;
  localparam int MW = 20;
  logic clk = 1'b0, rst = 1'b1, slot = 1'b0, su = 1'b0, sd = 1'b0;
  logic inc, dec, locked;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0;

  always #4 clk = ~clk;

  pfd_manager #(.MGR_WIN(MW)) dut (.clk(clk), .rst(rst), .slot_i(slot), .shift_up_i(su),
                                   .shift_down_i(sd), .freq_inc_o(inc), .freq_dec_o(dec), .locked_o(locked));

  always @(posedge clk) begin
    if (!rst && inc) n_inc++;   // outputs are unknown until the first reset edge
    if (!rst && dec) n_dec++;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit model_locked = 1'b0;
  // One manager window with n_down +1 votes and n_up -1 votes.
  task automatic mwin(input int n_down, input int n_up);
    int sum, mag, e_inc, e_dec;
    for (int s = 0; s < MW; s++) begin
      @(posedge clk);
      sd <= (s < n_down);
      su <= (s >= n_down) && (s < n_down + n_up);
      slot <= 1'b1;
      @(posedge clk);
      sd <= 1'b0; su <= 1'b0; slot <= 1'b0;
      repeat (2) @(posedge clk);
    end
    @(posedge clk); #1;
    sum = n_down - n_up;
    mag = sum < 0 ? -sum : sum;
    e_inc = 0; e_dec = 0;
    if (!model_locked) begin
      if (mag <= 2) model_locked = 1'b1;
      if (sum > 0) e_inc = 1;
      if (sum < 0) e_dec = 1;
    end else if (mag > 10) begin
      if (mag > 18) model_locked = 1'b0;
      if (sum > 0) e_inc = 1;
      if (sum < 0) e_dec = 1;
    end
    checks++;
    if (locked !== model_locked || n_inc != e_inc || n_dec != e_dec) begin
      failures++;
      $display("FAIL sum=%0d locked=%b inc=%0d dec=%0d exp %b %0d %0d", sum, locked, n_inc, n_dec, model_locked, e_inc, e_dec);
    end
    n_inc = 0; n_dec = 0;
  endtask

  initial begin
    int seen_unlock = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    mwin(12, 0);   // NCO slow: increase, stay unlocked
    mwin(0, 8);    // overshoot: decrease
    mwin(3, 1);    // |2| -> lock, request inc
    mwin(6, 0);    // locked, below activate: nothing
    mwin(0, 11);   // locked, above activate: decrease, keep lock
    mwin(19, 0);   // above unlock: unlock + increase
    checks++;
    if (locked) begin failures++; $display("FAIL still locked"); end
    mwin(1, 1);    // sum 0 -> lock, no request
    mwin(10, 10);  // locked, balanced: nothing
    for (int i = 0; i < 6; i++) mwin($urandom_range(0, 20), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
