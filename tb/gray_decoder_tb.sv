// gray_decoder_tb: every 4-bit and 6-bit value is Gray-encoded
// (g = b xor b>>1) and must decode back; rows of the 4-bit table are checked
// literally.
`timescale 1ns/1ps
module gray_decoder_tb;
  int checks = 0, failures = 0;
  logic [3:0] g4, b4;
  logic [5:0] g6, b6;

  gray_decoder #(.N(4)) d4 (.g(g4), .b(b4));
  gray_decoder #(.N(6)) d6 (.g(g6), .b(b6));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      g4 = 4'(v ^ (v >> 1));
      #1 check($sformatf("4-bit %0d", v), int'(b4), v);
    end
    g4 = 4'b1010; #1 check("1010", int'(b4), 12);
    g4 = 4'b1000; #1 check("1000", int'(b4), 15);
    g4 = 4'b0101; #1 check("0101", int'(b4), 6);
    for (int v = 0; v < 64; v++) begin
      g6 = 6'(v ^ (v >> 1));
      #1 check($sformatf("6-bit %0d", v), int'(b6), v);
    end
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
