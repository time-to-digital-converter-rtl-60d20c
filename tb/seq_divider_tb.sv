// seq_divider_tb: random 43-bit divisions (and a few edge cases) compared
// with the '/' operator; done must come W+1 cycles after start.
`timescale 1ns/1ps
module seq_divider_tb;
  localparam int W = 43;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] dividend, divisor, quotient;

  seq_divider #(.W(W)) dut (.clk, .rst_n, .start, .dividend, .divisor, .quotient, .busy, .done);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic divide(longint a, longint b);
    int cyc;
    @(negedge clk);
    dividend = W'(a); divisor = W'(b); start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check($sformatf("%0d/%0d", a, b), longint'(quotient), (b == 0) ? (longint'(1) << W) - 1 : a / b);
    check("latency", cyc, W + 1);
  endtask

  initial begin
    #12 rst_n = 1;
    divide(0, 5);
    divide(100, 7);
    divide(123456789, 1);
    divide(5, 0);
    divide((longint'(1) << W) - 1, 3);
    for (int t = 0; t < 200; t++) begin
      longint a, b;
      a = {$urandom, $urandom} & ((longint'(1) << W) - 1);
      b = longint'($urandom % 70000) + 1;
      divide(a, b);
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
