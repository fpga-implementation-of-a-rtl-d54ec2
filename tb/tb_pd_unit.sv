`timescale 1ns/1ps
// tb_pd_unit: I_CLK (8 ns) and Q_CLK (90 degrees ahead) sample random
// 125 Mbps data whose transitions sit at a chosen angle after the I_CLK
// rising edge. Window 64, threshold 8, 8 transitions. For data edges inside
// each of the four quadrants the two filtered decisions must be
//   0..90: I late, Q late     90..180: I late, Q early
//   180..270: I early, Q early 270..360: I early, Q late
// and with edges jittering around 180 degrees the I decision must be absent.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_pd_unit;
  import cdr_pkg::*;
  logic ci = 1'b0, cq = 1'b0, rst = 1'b1, data = 1'b0;
  pd_dec_t di, dq;
  logic we;
  int checks = 0, failures = 0;
  real angle = 45.0, jitter = 0.0;

  initial begin #2.0; forever #4 ci = ~ci; end   // I rises at 6, 14, 22, ...
  initial begin       forever #4 cq = ~cq; end   // Q rises at 4, 12, ...  (leads by 2 ns)

  pd_unit #(.WIN(64), .THRESH(8), .MIN_TRANS(8)) dut (
    .clk_i(ci), .clk_q(cq), .rst(rst), .data_i(data), .dec_i_o(di), .dec_q_o(dq), .win_end_o(we));

  // Data transitions at 6 ns + angle/360*8 (+ jitter) in every 8 ns bit.
  initial begin
    longint k = 1;
    forever begin
      real t;
      // With jitter the data toggle every bit and the edges alternate
      // between +jitter and -jitter, so the two sides balance exactly.
      t = 8.0 * k + 6.0 + angle / 45.0 + ((k % 2) ? jitter : -jitter);
      if (t > $realtime) begin
        #(t - $realtime);
        data = (jitter > 0.0) ? !data : 1'($urandom);
      end
      k++;
    end
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic at(input real a, input real j, input int ei, input int eq);
    // ei/eq: 1 early, 2 late, 0 undecided, -1 don't care
    angle = a; jitter = j;
    repeat (2) @(posedge we);   // let the first, mixed window pass
    repeat (4) begin
      @(posedge we); #0.1;
      if (ei >= 0) begin
        checks++;
        if (!di.valid || di.early != (ei == 1) || di.late != (ei == 2)) begin
          failures++; $display("FAIL angle %0.0f: I decision %b", a, di);
        end
      end
      if (eq >= 0) begin
        checks++;
        if (!dq.valid || dq.early != (eq == 1) || dq.late != (eq == 2)) begin
          failures++; $display("FAIL angle %0.0f: Q decision %b", a, dq);
        end
      end
    end
  endtask

  initial begin
    repeat (4) @(posedge ci);
    rst <= 1'b0;
    at(45.0,  0.0, 2, 2);
    at(135.0, 0.0, 2, 1);
    at(225.0, 0.0, 1, 1);
    at(315.0, 0.0, 1, 2);
    at(30.0,  0.3, 2, 2);
    at(180.0, 0.4, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
