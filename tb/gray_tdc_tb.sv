// gray_tdc_tb: 4-bit (default), 6-bit and 8-bit Gray code TDCs measure
// intervals of k stage delays (10 ns each). The binary output must be
// k mod 2^N, the captured Gray word k xor (k >> 1) of that, for both
// Initial Values; the 4-bit case is swept past its wrap.
`timescale 1ns/1ps
module gray_tdc_tb;
  int checks = 0, failures = 0;
  logic dclk = 0, start = 0, init_val = 0, stop = 0;
  logic [3:0] g4, b4;
  logic [5:0] g6, b6;
  logic [7:0] g8, b8;

  gray_tdc dut4 (.dclk, .start, .init_val, .stop, .g(g4), .b(b4));
  gray_tdc #(.N(6)) dut6 (.dclk, .start, .init_val, .stop, .g(g6), .b(b6));
  gray_tdc #(.N(8)) dut8 (.dclk, .start, .init_val, .stop, .g(g8), .b(b8));

  always #5 dclk = ~dclk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic measure(int k);
    start = 0;
    repeat (2) @(posedge dclk);
    #3 start = 1;
    repeat (k) @(posedge dclk);
    #4 stop = 1;
    #1;
    check($sformatf("b4 k=%0d", k), int'(b4), k % 16);
    check($sformatf("g4 k=%0d", k), int'(g4), (k % 16) ^ ((k % 16) >> 1));
    check($sformatf("b6 k=%0d", k), int'(b6), k % 64);
    check($sformatf("g6 k=%0d", k), int'(g6), (k % 64) ^ ((k % 64) >> 1));
    check($sformatf("b8 k=%0d", k), int'(b8), k % 256);
    #1 stop = 0;
  endtask

  initial begin
    for (int iv = 0; iv < 2; iv++) begin
      init_val = iv[0];
      for (int k = 0; k <= 40; k++) measure(k);
      for (int k = 60; k <= 260; k += 25) measure(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
