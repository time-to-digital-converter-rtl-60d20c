// ones_counter_tb: random 400-bit words with random phase; the code must be
// the number of ones (phase 1) or zeros (phase 0), counted bit by bit here.
// Also the all-zero and all-one words.
`timescale 1ns/1ps
module ones_counter_tb;
  localparam int M = 400;
  int checks = 0, failures = 0;
  logic [M-1:0] q;
  logic phase;
  logic [8:0] code;

  ones_counter dut (.q, .phase, .code);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int n;
    for (int t = 0; t < 300; t++) begin
      int density;
      density = $urandom % 101;
      n = 0;
      for (int i = 0; i < M; i++) begin
        q[i] = ($urandom % 100) < density;
        if (q[i]) n++;
      end
      phase = 1'($urandom);
      #1 check($sformatf("t=%0d", t), int'(code), phase ? n : M - n);
    end
    q = '0; phase = 1; #1 check("zeros", int'(code), 0);
    q = '1; phase = 1; #1 check("ones", int'(code), M);
    q = '1; phase = 0; #1 check("ones, falling", int'(code), 0);
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
