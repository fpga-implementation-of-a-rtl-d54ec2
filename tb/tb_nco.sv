`timescale 1ns/1ps
// tb_nco: checks the NCO at its default size (32-bit accumulator, 8 wheels,
// multiplication factor 3). Every output word is compared with phase points
// computed here in 64-bit arithmetic from the frequency law
//   point(n,k) = n*M + k*round(M/8),  bit = point scaled by 4, upper half
// and the number of rising edges of the serialised stream over many cycles is
// compared with f_out = M * f_C * 4 / 2^32. The nominal jump 2^30 must give a
// clean 125 MHz clock (four ones, four zeros per word).
// A second instance reproduces the two-wheel illustration of the technique:
// 250 MHz reference, 3-bit accumulator, PW = 2, M = 2, no multiplication. The
// serialised points must read 0000 1111 repeatedly, a 62.5 MHz clock at twice
// the time resolution of one wheel.
//
// The expected behaviour checked here follows the source design; stimulus,
// sizes and tolerances are this testbench's own choice.
module tb_nco;
  localparam int ACC_W = 32, PW = 8, G = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic [ACC_W-1:0] jump;
  logic [PW-1:0] word;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  nco dut (.clk(clk), .rst(rst), .jump(jump), .word(word));

  logic clk2 = 1'b0, rst2 = 1'b1;
  logic [1:0] word2;
  always #2 clk2 = ~clk2;
  nco #(.ACC_W(3), .PW(2), .G_MULT(1)) u_two (.clk(clk2), .rst(rst2), .jump(3'd2), .word(word2));

  initial begin
    repeat (2) @(posedge clk2);
    rst2 <= 1'b0;
    for (int n = 0; n < 40; n++) begin
      @(posedge clk2); #0.5;
      checks++;
      // acc = 2n mod 8; the wheel points 2n and 2n+1 are 1 in the upper half
      if (word2 !== (((n % 4) >= 2) ? 2'b11 : 2'b00)) begin
        failures++; $display("FAIL two-wheel example n=%0d word=%b", n, word2);
      end
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] ref_word(input longint unsigned n, input longint unsigned m);
    longint unsigned off, ph;
    logic [PW-1:0] w;
    off = (m + PW / 2) / PW;
    for (int k = 0; k < PW; k++) begin
      ph = (n * m + longint'(k) * off) % (64'd1 << ACC_W);
      ph = (ph << (G - 1)) % (64'd1 << ACC_W);
      w[k] = (ph >= (64'd1 << (ACC_W - 1)));
    end
    return w;
  endfunction

  task automatic run(input longint unsigned m, input int cycles);
    int unsigned edges;
    logic last;
    real expect_edges;
    rst  <= 1'b1;
    jump <= ACC_W'(m);
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;      // the word of point n=0 is visible after the next edge
    edges = 0; last = 1'b0;
    for (int n = 0; n < cycles; n++) begin
      @(posedge clk); #1;
      checks++;
      if (word !== ref_word(longint'(n), m)) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d n=%0d word=%b exp=%b", m, n, word, ref_word(longint'(n), m));
      end
      for (int k = 0; k < PW; k++) begin
        if (word[k] && !last) edges++;
        last = word[k];
      end
    end
    expect_edges = real'(cycles) * real'(m) * 4.0 / (2.0 ** ACC_W);
    checks++;
    if ((real'(edges) - expect_edges) > 1.5 || (expect_edges - real'(edges)) > 1.5) begin
      failures++;
      $display("FAIL m=%0d edges=%0d expected %0.2f", m, edges, expect_edges);
    end
  endtask

  initial begin
    jump = '0;
    run(64'd1 << 30, 200);
    checks++;
    if (word !== 8'b1111_0000) begin failures++; $display("FAIL nominal word %b", word); end
    run((64'd1 << 30) + 64'd123457, 20000);
    run((64'd1 << 30) - 64'd98765, 20000);
    run(64'd300000001, 5000);          // about 35 MHz
    run((64'd1 << 31) - 64'd1, 2000);  // Nyquist limit of Eq. 4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
