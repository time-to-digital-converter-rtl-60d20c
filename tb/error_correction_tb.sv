// error_correction_tb: a random histogram (with a skewed part, as from
// uneven code widths) is presented on the histogram port; after build the
// table must give floor(FS * 2^8 * sum Pin(1..N) / sum Pin(1..FS)) for
// every code N, computed here independently. An empty histogram must give
// the identity table; a second build with a new histogram must replace the
// first; corr_valid must follow raw_valid by one cycle only when ready.
`timescale 1ns/1ps
module error_correction_tb;
  localparam int FS = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, build = 0, raw_valid = 0, busy, ready, corr_valid;
  logic [8:0]  hist_addr, raw_code;
  logic [16:0] hist_data, corr;
  longint      h [FS + 1];

  error_correction dut (.clk, .rst_n, .build, .hist_addr, .hist_data, .raw_code,
                        .raw_valid, .busy, .ready, .corr, .corr_valid);

  assign hist_data = 17'(h[hist_addr]);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint expect_corr(int n);
    longint cum = 0, total = 0;
    for (int i = 1; i <= FS; i++) total += h[i];
    for (int i = 1; i <= n; i++) cum += h[i];
    if (total == 0) return longint'(n) << 8;
    if (n == 0) return 0;
    return (cum * FS * 256) / total;
  endfunction

  task automatic run_build();
    @(negedge clk) build = 1;
    @(negedge clk) build = 0;
    check("busy after build", longint'(busy), 1);
    while (!ready) @(negedge clk);
  endtask

  task automatic check_table(string what);
    for (int n = 0; n <= FS; n++) begin
      @(negedge clk) raw_code = 9'(n); raw_valid = 1;
      @(negedge clk) raw_valid = 0;
      check($sformatf("%s valid %0d", what, n), longint'(corr_valid), 1);
      check($sformatf("%s N=%0d", what, n), longint'(corr), expect_corr(n));
    end
  endtask

  initial begin
    raw_code = 0;
    foreach (h[i]) h[i] = 0;
    #12 rst_n = 1;
    // before any build: no corrected output
    @(negedge clk) raw_valid = 1;
    @(negedge clk) raw_valid = 0;
    check("no output before ready", longint'(corr_valid), 0);
    run_build();
    check_table("empty");
    foreach (h[i]) h[i] = (i < 150) ? $urandom % 40 : $urandom % 400;
    h[0] = 5000;
    run_build();
    check_table("random");
    foreach (h[i]) h[i] = 1 + (i % 7);
    run_build();
    check_table("periodic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
