// stoch_case_run: one complete run of the stochastic TDC for one set of
// flip-flop offsets, used by stoch_cases_tb to compare several cases side by
// side. Not a testbench on its own (it has parameters and ports).
//
// It connects the behavioural front end (offsets from OFFSET_FILE, first M
// entries) to a stoch_tdc of M flip-flops, calibrates with CAL STOP pulses
// at random ~8 ns intervals against the free-running ring, then sweeps the
// START-to-STOP interval from 0 to 42 ps in 0.1 ps steps. For every point it
// checks the raw code (number of offsets below the interval) and the
// corrected code (floor(M * 2^FRAC * cum(raw) / total) from its own
// histogram). At the end it reports the largest |INL| before and after
// correction (least-squares line over the points inside the range, in
// input steps) and the resolution, the spread of the offsets divided by the
// number of levels M.
//
// Ports: done rises when the run ends; checks/failures count the checks;
// inl_raw, inl_cor and res_ps hold the results.
`timescale 1ps/1fs
module stoch_case_run #(
  parameter int    M           = 400,
  parameter string OFFSET_FILE = "tb/stoch_case1_offsets.mem",
  parameter int    CAL         = 16384,
  parameter int    SEED        = 1
) (
  output logic done,
  output int   checks,
  output int   failures,
  output real  inl_raw,
  output real  inl_cor,
  output real  res_ps
);
  import tdc_pkg::*;
  localparam int FRAC  = 8;
  localparam int NPTS  = 421;
  localparam int CODEW = $clog2(M + 1);

  logic clk = 0, rst_n = 0, start = 0, stop = 0, cal_req = 0;
  logic [M-1:0] q;
  logic phase, sel, raw_valid, corr_valid, calibrated;
  stoch_mode_e mode;
  logic [CODEW-1:0]      raw_code;
  logic [CODEW+FRAC-1:0] corr_code;
  logic [16:0]           hist_samples;

  stoch_frontend_model #(.M(M), .OFFSET_FILE(OFFSET_FILE)) fe (
    .start, .stop, .sel, .q, .phase);

  stoch_tdc #(.M(M), .CAL_SAMPLES(CAL)) dut (
    .clk, .rst_n, .stop, .q, .phase, .cal_req, .sel, .mode, .raw_code,
    .raw_valid, .corr_code, .corr_valid, .calibrated, .hist_samples);

  always #500 clk = ~clk;

  initial begin
    done = 0; checks = 0; failures = 0;
    inl_raw = 0.0; inl_cor = 0.0; res_ps = 0.0;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d %s: %s got %0d expected %0d", M, OFFSET_FILE, what, got, exp);
    end
  endtask

  longint hist [M + 1];
  always @(posedge clk) begin
    if (rst_n && raw_valid && mode == MODE_CALIB) hist[raw_code]++;
  end

  real s_raw [NPTS], s_cor [NPTS];

  function automatic longint expected_corr(int raw);
    longint cum, total;
    cum = 0; total = 0;
    for (int i = 1; i <= M; i++) total += hist[i];
    for (int i = 1; i <= raw; i++) cum += hist[i];
    if (raw == 0 || total == 0) return 0;
    return (cum * M * (1 << FRAC)) / total;
  endfunction

  // least-squares line over the sweep points inside the measurement range
  // (raw code strictly between 0 and M), worst deviation in input steps
  function automatic real max_inl(bit use_cor);
    real k1, k2, k3, k4, n, gain, offs, worst, v, inl;
    k1 = 0; k2 = 0; k3 = 0; k4 = 0; n = 0; worst = 0;
    for (int i = 1; i <= NPTS; i++) begin
      if (s_raw[i-1] > 0.0 && s_raw[i-1] < real'(M)) begin
        v = use_cor ? s_cor[i-1] : s_raw[i-1];
        n += 1.0;
        k1 += real'(i); k2 += v; k3 += real'(i) * real'(i); k4 += real'(i) * v;
      end
    end
    gain = (n * k4 - k1 * k2) / (n * k3 - k1 * k1);
    offs = k2 / n - gain * k1 / n;
    for (int i = 1; i <= NPTS; i++) begin
      if (s_raw[i-1] > 0.0 && s_raw[i-1] < real'(M)) begin
        v = use_cor ? s_cor[i-1] : s_raw[i-1];
        inl = (v - (gain * real'(i) + offs)) / gain;
        if (inl < 0) inl = -inl;
        if (inl > worst) worst = inl;
      end
    end
    return worst;
  endfunction

  initial begin
    int  lat, exp_raw;
    real dt, omin, omax;
    int unsigned s;
    s = $urandom(SEED);
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
    check("histogram total", longint'(hist_samples), CAL);
    wait (calibrated);
    @(posedge clk); #1;
    check("mode measure", longint'(mode), longint'(MODE_MEASURE));
    #5000;
    for (int k = 0; k < NPTS; k++) begin
      dt = 0.1 * k + 0.005;
      exp_raw = 0;
      for (int i = 0; i < M; i++) if (fe.offset(i) <= dt) exp_raw++;
      @(negedge clk);
      #100 start = 1;
      #(dt) stop = 1;
      lat = 0;
      while (!raw_valid) begin @(posedge clk); #1 lat++; end
      check("raw code", longint'(raw_code), exp_raw);
      @(posedge clk); #1;
      check("corr_valid", longint'(corr_valid), 1);
      check("corrected code", longint'(corr_code), expected_corr(exp_raw));
      s_raw[k] = real'(raw_code);
      s_cor[k] = real'(corr_code) / (1 << FRAC);
      #2000 stop = 0; start = 0;
      #4000;
    end
    inl_raw = max_inl(1'b0);
    inl_cor = max_inl(1'b1);
    check("INL improved", longint'(inl_cor < inl_raw), 1);
    omin = fe.offset(0); omax = omin;
    for (int i = 1; i < M; i++) begin
      if (fe.offset(i) < omin) omin = fe.offset(i);
      if (fe.offset(i) > omax) omax = fe.offset(i);
    end
    res_ps = (omax - omin) / real'(M);
    done = 1;
  end
endmodule
