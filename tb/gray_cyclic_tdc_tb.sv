// gray_cyclic_tdc_tb: the 6-bit Gray code TDC with cyclic code measures
// intervals of k stage delays (20 ns each, as in the prototype) for
// k = 0..140 and both Initial Values; the output must be k mod 64 and the
// captured Gray word its Gray code.
`timescale 1ns/1ps
module gray_cyclic_tdc_tb;
  int checks = 0, failures = 0;
  logic dclk = 0, start = 0, init_val = 0, stop = 0;
  logic [5:0] g, b;

  gray_cyclic_tdc dut (.dclk, .start, .init_val, .stop, .g, .b);

  always #10 dclk = ~dclk;

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
    #8 stop = 1;
    #1;
    check($sformatf("b k=%0d init=%0d", k, init_val), int'(b), k % 64);
    check($sformatf("g k=%0d init=%0d", k, init_val), int'(g), (k % 64) ^ ((k % 64) >> 1));
    #1 stop = 0;
  endtask

  initial begin
    for (int iv = 0; iv < 2; iv++) begin
      init_val = iv[0];
      for (int k = 0; k <= 140; k++) measure(k);
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
