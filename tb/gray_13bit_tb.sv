// gray_13bit_tb: 13-bit (8192-level) Gray code TDC and Gray code TDC with
// cyclic code, the size used to compare these converters with a flash TDC
// of 8192 stages.
//
// gray_tdc at N = 13 has rings of 2, 4, ..., 2048 stages and one of 4096
// stages shared by the top two bits: 8190 delay cells, 13 capture
// flip-flops. gray_cyclic_tdc at N = 13 replaces the 2- and 4-stage rings by
// the 8-bit cyclic generator: 8184 ring stages plus 8 generator flip-flops.
// Both share START, STOP and Initial Value. For k dclk edges between START
// and STOP, b must be k mod 8192 and g its Gray code. k runs over 0..40,
// every 2^j - 1, 2^j and 2^j + 1, values around the wrap at 8192 and 24
// random values up to 16383, for both Initial Values on part of the set.
`timescale 1ns/1ps
module gray_13bit_tb;
  localparam int N = 13;
  int checks = 0, failures = 0;
  logic dclk = 0, start = 0, init_val = 0, stop = 0;
  logic [N-1:0] g1, b1, g2, b2;

  gray_tdc        #(.N(N)) u_gray (.dclk, .start, .init_val, .stop, .g(g1), .b(b1));
  gray_cyclic_tdc #(.N(N)) u_gcyc (.dclk, .start, .init_val, .stop, .g(g2), .b(b2));

  always #10 dclk = ~dclk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic measure(int k);
    int e;
    start = 0;
    repeat (2) @(posedge dclk);
    #3 start = 1;
    repeat (k) @(posedge dclk);
    #8 stop = 1;
    #1;
    e = k % (1 << N);
    check($sformatf("gray b k=%0d init=%0d", k, init_val), int'(b1), e);
    check($sformatf("gray g k=%0d init=%0d", k, init_val), int'(g1), e ^ (e >> 1));
    check($sformatf("cyclic b k=%0d init=%0d", k, init_val), int'(b2), e);
    check($sformatf("cyclic g k=%0d init=%0d", k, init_val), int'(g2), e ^ (e >> 1));
    #1 stop = 0;
  endtask

  initial begin
    for (int k = 0; k <= 40; k++) measure(k);
    for (int j = 3; j <= N; j++) begin
      measure((1 << j) - 1);
      measure(1 << j);
      measure((1 << j) + 1);
    end
    measure(8190); measure(8193); measure(8200);
    for (int i = 0; i < 24; i++) measure(int'($urandom % 16384));
    init_val = 1;
    for (int k = 0; k <= 12; k++) measure(k);
    measure(4095); measure(4096); measure(8191); measure(8192);
    for (int i = 0; i < 8; i++) measure(int'($urandom % 16384));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
