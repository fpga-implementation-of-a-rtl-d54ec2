`timescale 1ns/1ps
// tb_prbs_checker: a PRBS-7 stream computed here (independently of the
// generator block) is fed to the checker. Error-free data must give no error
// and count every bit; each isolated flipped bit must add exactly three
// errors; nothing is counted while en is low; sync_o drops on errors and
// returns after clean bits.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_prbs_checker;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, b = 1'b0;
  logic [31:0] errs;
  logic [47:0] bits;
  logic sync;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  prbs_checker dut (.clk(clk), .rst(rst), .en(en), .bit_i(b), .err_cnt_o(errs), .bit_cnt_o(bits), .sync_o(sync));

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Continuous stream, one bit per clock; send() selects how many bits to
  // wait for and how often a bit is flipped meanwhile.
  logic [6:0] lfsr = 7'h55;
  int flip_every = 0, pos = 0;
  always @(posedge clk) begin
    logic nb;
    nb   = lfsr[6] ^ lfsr[5];
    lfsr = {lfsr[5:0], nb};
    b <= (flip_every > 0 && (pos % flip_every) == flip_every / 2) ? ~nb : nb;
    pos++;
  end

  task automatic send(input int n, input int fe);
    flip_every = fe; pos = 0;
    repeat (n) @(posedge clk);
    flip_every = 0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (errs=%0d bits=%0d)", what, errs, bits); end
  endtask

  int e0, b0;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    send(20, 0);
    en <= 1'b1;
    send(500, 0);
    @(posedge clk); #1;
    check(errs == 0, "no errors on clean data");
    check(bits >= 499 && bits <= 501, "all bits counted");
    check(sync === 1'b1, "sync on clean data");
    e0 = int'(errs);
    send(400, 40);                 // 10 isolated errors
    send(20, 0);
    @(posedge clk); #1;
    check(int'(errs) - e0 == 30, "three errors per flipped bit");
    en <= 1'b0;
    e0 = int'(errs); b0 = int'(bits);
    send(200, 20);
    @(posedge clk); @(posedge clk); #1;
    check(int'(errs) == e0 && int'(bits) == b0, "nothing counted while disabled");
    send(30, 0);
    @(posedge clk); #1;
    check(sync === 1'b1, "sync regained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
