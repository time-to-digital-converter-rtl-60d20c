// residue_encoder_tb: feeds every state of rings of 2, 3, 5 and 7 stages
// (built from the state index) and checks the residue index mod M.
`timescale 1ns/1ps
module residue_encoder_tb;
  int checks = 0, failures = 0;
  logic [1:0] q2; logic [0:0] a2;
  logic [2:0] q3; logic [1:0] a3;
  logic [4:0] q5; logic [2:0] a5;
  logic [6:0] q7; logic [2:0] a7;

  residue_encoder #(.M(2)) d2 (.q(q2), .a(a2));
  residue_encoder #(.M(3)) d3 (.q(q3), .a(a3));
  residue_encoder #(.M(5)) d5 (.q(q5), .a(a5));
  residue_encoder #(.M(7)) d7 (.q(q7), .a(a7));

  function automatic logic [6:0] state(int m, int s);
    logic [6:0] v = '0;
    for (int i = 0; i < m; i++) v[i] = (s < m) ? (i < s) : (i >= s - m);
    return v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 70; t++) begin
      q2 = 2'(state(2, t % 4));
      q3 = 3'(state(3, t % 6));
      q5 = 5'(state(5, t % 10));
      q7 = state(7, t % 14);
      #1;
      check($sformatf("m2 t=%0d", t), int'(a2), t % 2);
      check($sformatf("m3 t=%0d", t), int'(a3), t % 3);
      check($sformatf("m5 t=%0d", t), int'(a5), t % 5);
      check($sformatf("m7 t=%0d", t), int'(a7), t % 7);
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
