// ring_osc_tb: checks the 8-stage ring oscillator against the ring/Gray
// state table (R0..R7 for states 0..15), its hold at Initial Value while
// START is low, the wrap after 16 stage delays, and a 3-stage ring.
`timescale 1ns/1ps
module ring_osc_tb;
  int checks = 0, failures = 0;
  logic dclk = 0, start = 0, init_val = 0;
  logic [7:0] r8;
  logic [2:0] r3;

  ring_osc #(.STAGES(8)) dut8 (.dclk, .start, .init_val, .r(r8));
  ring_osc #(.STAGES(3)) dut3 (.dclk, .start, .init_val, .r(r3));

  always #5 dclk = ~dclk;

  // expected Johnson state after k stage delays from all-zero, bit i = R(i)
  function automatic logic [7:0] exp8(int k);
    int s = k % 16;
    logic [7:0] v = '0;
    for (int i = 0; i < 8; i++) v[i] = (s < 8) ? (i < s) : (i >= s - 8);
    return v;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge dclk);
    #1 check("held at 0", 32'(r8), 0);
    init_val = 1;
    @(posedge dclk); #1 check("held at 1", 32'(r8), 32'hff);
    init_val = 0;
    @(posedge dclk); #1;
    start = 1;
    for (int k = 1; k <= 40; k++) begin
      @(posedge dclk); #1;
      check($sformatf("state %0d", k), 32'(r8), 32'(exp8(k)));
      // R3 is Gray bit G2 and R7 is G3 of the count
      check($sformatf("G2/G3 %0d", k), {r8[7], r8[3]}, ((k % 16) ^ ((k % 16) >> 1)) >> 2);
      check($sformatf("3-stage %0d", k), 32'(r3),
            ((k % 6) < 3) ? ((1 << (k % 6)) - 1) : (3'b111 << ((k % 6) - 3)) & 3'b111);
    end
    start = 0;
    @(posedge dclk); #1 check("reinit", 32'(r8), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
