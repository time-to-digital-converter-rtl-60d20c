// crt_decoder_tb: for moduli (2,3,5) every x in 0..29 is reduced to its
// residues and must come back unchanged (the one-to-one mapping of the
// residue table); a few rows of that table are also checked literally.
// Moduli (5,7,9), 315 levels, are checked the same way.
`timescale 1ns/1ps
module crt_decoder_tb;
  int checks = 0, failures = 0;
  logic [0:0] a1; logic [1:0] a2; logic [2:0] a3; logic [4:0] x;
  logic [2:0] b1; logic [2:0] b2; logic [3:0] b3; logic [8:0] y;

  crt_decoder dut (.a1, .a2, .a3, .x);
  crt_decoder #(.M1(5), .M2(7), .M3(9)) dut2 (.a1(b1), .a2(b2), .a3(b3), .x(y));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 30; v++) begin
      a1 = 1'(v % 2); a2 = 2'(v % 3); a3 = 3'(v % 5);
      #1 check($sformatf("x=%0d", v), int'(x), v);
    end
    // rows of the residue table: (m1,m2,m3) -> x
    a1 = 1; a2 = 2; a3 = 3; #1 check("row 23", int'(x), 23);
    a1 = 0; a2 = 1; a3 = 1; #1 check("row 16", int'(x), 16);
    a1 = 1; a2 = 1; a3 = 4; #1 check("row 19", int'(x), 19);
    for (int v = 0; v < 315; v++) begin
      b1 = 3'(v % 5); b2 = 3'(v % 7); b3 = 4'(v % 9);
      #1 check($sformatf("y=%0d", v), int'(y), v);
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
