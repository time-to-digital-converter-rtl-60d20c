// rns_tdc_tb: START-to-STOP intervals of k stage delays, k = 0..70, with
// both Initial Values, must give residues k mod 2, k mod 3, k mod 5 and
// x = k mod 30 (the count wraps after 30 levels). The stage delay is 10 ns
// as in the prototype; STOP falls mid-way between two stage-clock edges.
`timescale 1ns/1ps
module rns_tdc_tb;
  int checks = 0, failures = 0;
  logic dclk = 0, start = 0, init_val = 0, stop = 0;
  logic [0:0] a1; logic [1:0] a2; logic [2:0] a3; logic [4:0] x;

  rns_tdc dut (.dclk, .start, .init_val, .stop, .a1, .a2, .a3, .x);

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
    check($sformatf("a1 k=%0d init=%0d", k, init_val), int'(a1), k % 2);
    check($sformatf("a2 k=%0d init=%0d", k, init_val), int'(a2), k % 3);
    check($sformatf("a3 k=%0d init=%0d", k, init_val), int'(a3), k % 5);
    check($sformatf("x k=%0d init=%0d", k, init_val), int'(x), k % 30);
    #1 stop = 0;
  endtask

  initial begin
    for (int iv = 0; iv < 2; iv++) begin
      init_val = iv[0];
      for (int k = 0; k <= 70; k++) measure(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
