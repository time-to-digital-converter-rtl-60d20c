// cyclic_code_gen_tb: checks the generator's states 0..7 against the
// cyclic-code table (code-word 00001111, C0..C7), that C0^C2 and C1 follow
// Gray bits G0 and G1 for 24 shifts, and the Initial Value = 1 load.
`timescale 1ns/1ps
module cyclic_code_gen_tb;
  int checks = 0, failures = 0;
  logic dclk = 0, start = 0, init_val = 0;
  logic [7:0] c;
  logic g0, g1;

  cyclic_code_gen dut (.dclk, .start, .init_val, .c, .g0, .g1);

  always #5 dclk = ~dclk;

  // table rows as C0..C7 strings, C0 first
  string rows [8] = '{"00001111", "10000111", "11000011", "11100001",
                      "11110000", "01111000", "00111100", "00011110"};

  function automatic logic [7:0] row(int s);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[i] = (rows[s][i] == "1");
    return v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    @(posedge dclk); #1;
    check("init 0", int'(c), int'(row(0)));
    init_val = 1;
    @(posedge dclk); #1 check("init 1", int'(c), 8'h0f);
    init_val = 0;
    @(posedge dclk); #1;
    start = 1;
    for (int k = 1; k <= 24; k++) begin
      @(posedge dclk); #1;
      check($sformatf("state %0d", k), int'(c), int'(row(k % 8)));
      check($sformatf("G1G0 %0d", k), int'({g1, g0}), (k ^ (k >> 1)) & 3);
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
