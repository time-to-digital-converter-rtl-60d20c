// stoch_tdc_tb: stochastic TDC back end driven by the behavioural front end
// with the 400 flip-flop offsets of delay-variation case #1.
//
// 1. Calibration: cal_req, then STOP pulses at jittered ~8 ns intervals
//    while the front end's ring oscillator runs. Every raw code is checked
//    against the number of ones (or zeros on a falling half-wave) of q, and
//    the testbench keeps its own histogram.
// 2. Measurement: START-to-STOP intervals swept over 0..42 ps. The raw code
//    must equal the number of offsets below the interval; the corrected
//    code must equal floor(FS * 2^FRAC * cum(raw) / total) from the
//    testbench's histogram; the latency STOP -> raw_valid is checked.
// 3. Linearity: the least-squares INL of the corrected sweep must be below
//    that of the raw sweep.
`timescale 1ps/1fs
module stoch_tdc_tb;
  import tdc_pkg::*;
  localparam int M    = 400;
  localparam int CAL  = 16384;
  localparam int FRAC = 8;
  localparam int NPTS = 421;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, cal_req = 0;
  logic [M-1:0] q;
  logic phase, sel, raw_valid, corr_valid, calibrated;
  stoch_mode_e mode;
  logic [8:0]  raw_code;
  logic [16:0] corr_code, hist_samples;

  stoch_frontend_model #(.M(M), .OFFSET_FILE("tb/stoch_case1_offsets.mem")) fe (
    .start, .stop, .sel, .q, .phase);

  stoch_tdc #(.CAL_SAMPLES(CAL)) dut (
    .clk, .rst_n, .stop, .q, .phase, .cal_req, .sel, .mode, .raw_code,
    .raw_valid, .corr_code, .corr_valid, .calibrated, .hist_samples);

  always #500 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // testbench histogram and raw-code check
  longint hist [M + 1];
  int     n_cal = 0, n_fall = 0;
  always @(posedge clk) begin
    if (rst_n && raw_valid) begin
      int ones;
      ones = 0;
      for (int i = 0; i < M; i++) ones += int'(q[i]);
      check("raw = count", longint'(raw_code), phase ? ones : M - ones);
      if (mode == MODE_CALIB) begin
        hist[raw_code]++;
        n_cal++;
        if (!phase) n_fall++;
      end
    end
  end

  real s_raw [NPTS], s_cor [NPTS];

  function automatic longint expected_corr(int raw);
    longint cum = 0, total = 0;
    for (int i = 1; i <= M; i++) total += hist[i];
    for (int i = 1; i <= raw; i++) cum += hist[i];
    if (raw == 0) return 0;
    return (cum * M * (1 << FRAC)) / total;
  endfunction

  function automatic real max_inl(bit use_cor);
    real k1 = 0, k2 = 0, k3 = 0, k4 = 0, n = NPTS, gain, offs, worst = 0;
    real s [NPTS];
    for (int i = 0; i < NPTS; i++) s[i] = use_cor ? s_cor[i] : s_raw[i];
    for (int i = 1; i <= NPTS; i++) begin
      k1 += real'(i); k2 += s[i-1]; k3 += real'(i) * real'(i); k4 += real'(i) * s[i-1];
    end
    gain = (n * k4 - k1 * k2) / (n * k3 - k1 * k1);
    offs = k2 / n - gain * k1 / n;
    for (int i = 1; i <= NPTS; i++) begin
      real inl;
      inl = (s[i-1] - (gain * real'(i) + offs)) / gain;
      if (inl < 0) inl = -inl;
      if (inl > worst) worst = inl;
    end
    return worst;
  endfunction

  initial begin
    int lat;
    real inl_raw, inl_cor;
    foreach (hist[i]) hist[i] = 0;
    #3200 rst_n = 1;
    #5000;
    @(negedge clk) cal_req = 1;
    @(negedge clk) cal_req = 0;
    #3000;
    while (mode == MODE_CALIB) begin
      stop = 1; #(3000 + $urandom % 997);
      stop = 0; #(5000 + $urandom % 1009);
    end
    check("calibration samples", longint'(n_cal), CAL);
    check("histogram total", longint'(hist_samples), CAL);
    wait (calibrated);
    @(posedge clk); #1;
    check("mode measure", longint'(mode), longint'(MODE_MEASURE));
    check("falling half-waves seen", longint'(n_fall > 0), 1);
    #5000;
    for (int k = 0; k < NPTS; k++) begin
      real dt;
      int  exp_raw;
      dt = 0.1 * k + 0.005;
      exp_raw = 0;
      for (int i = 0; i < M; i++) if (fe.offset(i) <= dt) exp_raw++;
      @(negedge clk);
      #100 start = 1;
      #(dt) stop = 1;
      lat = 0;
      while (!raw_valid) begin @(posedge clk); #1 lat++; end
      check($sformatf("latency %0d", k), longint'(lat >= 3 && lat <= 5), 1);
      check($sformatf("raw dt=%f", dt), longint'(raw_code), exp_raw);
      @(posedge clk); #1;
      check($sformatf("corr_valid %0d", k), longint'(corr_valid), 1);
      check($sformatf("corr dt=%f", dt), longint'(corr_code), expected_corr(exp_raw));
      s_raw[k] = real'(raw_code);
      s_cor[k] = real'(corr_code) / (1 << FRAC);
      #2000 stop = 0; start = 0;
      #4000;
    end
    inl_raw = max_inl(1'b0);
    inl_cor = max_inl(1'b1);
    $display("max |INL| (input steps of 0.1 ps): raw %f corrected %f", inl_raw, inl_cor);
    check("INL improved", longint'(inl_cor < inl_raw), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
