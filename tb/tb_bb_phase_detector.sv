`timescale 1ns/1ps
// tb_bb_phase_detector: an 8 ns clock samples 125 Mbps random data whose
// transitions sit at a chosen phase after the rising clock edge. Transitions
// before the falling edge (phase 0..4 ns) must give only 'late' pulses,
// after it (4..8 ns) only 'early' pulses, one pulse per data transition, and
// the recovered data must equal the sent data two cycles later.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_bb_phase_detector;
  logic clk = 1'b0, rst = 1'b1, data = 1'b0;
  logic early, late, dout;
  int checks = 0, failures = 0;
  int n_early, n_late, n_trans;

  always #4 clk = ~clk;

  bb_phase_detector dut (.clk(clk), .rst(rst), .data_i(data), .early_o(early), .late_o(late), .data_o(dout));

  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (early) n_early++;
    if (late)  n_late++;
  end

  logic sent[$];
  task automatic run(input real phase, input bit expect_late);
    int n = 400;
    logic b, prev;
    n_early = 0; n_late = 0; n_trans = 0;
    sent.delete();
    @(posedge clk);
    #(phase);
    prev = data;
    for (int i = 0; i < n; i++) begin
      b = 1'($urandom);
      if (b != prev) n_trans++;
      data = b; prev = b;
      sent.push_back(b);
      #8;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (expect_late ? (n_late != n_trans || n_early != 0) : (n_early != n_trans || n_late != 0)) begin
      failures++;
      $display("FAIL phase %0.1f: trans=%0d early=%0d late=%0d", phase, n_trans, n_early, n_late);
    end
  endtask

  // Recovered data follows the sent data.
  int n_data_err = 0;
  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(1.0, 1'b1);
    run(3.0, 1'b1);
    run(5.0, 1'b0);
    run(7.5, 1'b0);
    run(2.2, 1'b1);
    // data_o check: transitions 4.5 ns after the rising edge, so every
    // rising edge samples mid-bit; data_o shows the sample of the previous
    // rising edge.
    fork
      begin
        @(posedge clk); #4.5;
        for (int i = 0; i < 200; i++) begin data = 1'($urandom); #8; end
      end
      begin
        logic smp, smp_q;
        repeat (3) @(posedge clk);
        smp = data;
        for (int i = 0; i < 190; i++) begin
          @(posedge clk);
          smp_q = smp;
          smp   = data;
          #1;
          checks++;
          if (dout !== smp_q) begin failures++; if (failures < 5) $display("FAIL data %0d", i); end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
