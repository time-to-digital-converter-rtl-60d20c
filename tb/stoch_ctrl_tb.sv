// stoch_ctrl_tb: walks the controller through IDLE -> CALIB -> BUILD ->
// MEASURE and a recalibration with CAL_SAMPLES = 10: sel only in CALIB, one
// hist_clear pulse on entry, exactly 10 hist_inc pulses, one build pulse,
// MEASURE only after the table build has finished.
`timescale 1ns/1ps
module stoch_ctrl_tb;
  import tdc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cal_req = 0, sample = 0, build_busy = 0;
  stoch_mode_e mode;
  logic sel, hist_clear, hist_inc, build;
  int n_clear = 0, n_inc = 0, n_build = 0, n_sel_bad = 0;

  stoch_ctrl #(.CAL_SAMPLES(10)) dut (.clk, .rst_n, .cal_req, .sample, .build_busy,
                                      .mode, .sel, .hist_clear, .hist_inc, .build);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (hist_clear) n_clear++;
    if (hist_inc)   n_inc++;
    if (build)      n_build++;
    if (sel != (mode == MODE_CALIB)) n_sel_bad++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic calibrate(string what);
    n_clear = 0; n_inc = 0; n_build = 0;
    @(negedge clk) cal_req = 1;
    @(negedge clk) cal_req = 0;
    check({what, " calib"}, int'(mode), int'(MODE_CALIB));
    check({what, " sel"}, int'(sel), 1);
    for (int i = 0; i < 14; i++) begin
      @(negedge clk) sample = 1;
      @(negedge clk) sample = 0;
      repeat (2) @(negedge clk);
    end
    check({what, " build mode"}, int'(mode), int'(MODE_BUILD));
    check({what, " sel off"}, int'(sel), 0);
    @(negedge clk) build_busy = 1;
    repeat (5) @(negedge clk);
    check({what, " still building"}, int'(mode), int'(MODE_BUILD));
    build_busy = 0;
    repeat (2) @(negedge clk);
    check({what, " measure"}, int'(mode), int'(MODE_MEASURE));
    check({what, " clears"}, n_clear, 1);
    check({what, " samples"}, n_inc, 10);
    check({what, " builds"}, n_build, 1);
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    check("idle", int'(mode), int'(MODE_IDLE));
    check("idle sel", int'(sel), 0);
    calibrate("first");
    @(negedge clk) sample = 1;
    @(negedge clk) sample = 0;
    check("measure ignores samples", int'(hist_inc), 0);
    calibrate("second");
    check("sel only in calibration", n_sel_bad, 0);
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
