// tdc_top_tb: end-to-end test of all four converters in tdc_top at their
// default sizes.
//   RNS TDC        -- intervals of k = 0..65 stage delays (10 ns), both
//                     Initial Values: residues and x = k mod 30.
//   Gray TDC       -- k = 0..40: binary k mod 16, Gray word.
//   Gray + cyclic  -- k = 0..140: binary k mod 64, Gray word.
//   Stochastic TDC -- front-end model with the case #1 offsets: full
//                     calibration (65536 samples), table build, a 0..42 ps
//                     measurement sweep with exact raw and corrected codes,
//                     INL improvement, then a recalibration.
// Each mechanism (wrap of each counter range, Initial Value 1, falling
// half-wave samples, calibration, build, measurement, recalibration) is
// counted and must have happened at least once.
`timescale 1ps/1fs
module tdc_top_tb;
  import tdc_pkg::*;
  localparam int M    = 400;
  localparam int CAL  = 65536;
  localparam int NPTS = 421;

  int checks = 0, failures = 0;
  logic dclk = 0, clk = 0, rst_n = 0;
  logic rns_start = 0, rns_init = 0, rns_stop = 0;
  logic gray_start = 0, gray_init = 0, gray_stop = 0;
  logic gcyc_start = 0, gcyc_init = 0, gcyc_stop = 0;
  logic sto_stop = 0, sto_start = 0, sto_cal_req = 0;
  logic [M-1:0] sto_q;
  logic sto_phase, sto_sel, sto_raw_valid, sto_corr_valid, sto_calibrated;
  stoch_mode_e sto_mode;
  logic [0:0] rns_a1; logic [1:0] rns_a2; logic [2:0] rns_a3; logic [4:0] rns_x;
  logic [3:0] gray_g, gray_b;
  logic [5:0] gcyc_g, gcyc_b;
  logic [8:0] sto_raw_code;
  logic [16:0] sto_corr_code, sto_hist_samples;

  tdc_top dut (.*);

  stoch_frontend_model #(.M(M), .OFFSET_FILE("tb/stoch_case1_offsets.mem")) fe (
    .start(sto_start), .stop(sto_stop), .sel(sto_sel), .q(sto_q), .phase(sto_phase));

  always #5000 dclk = ~dclk;
  always #500  clk  = ~clk;

  // mechanism counters
  int n_rns_wrap = 0, n_gray_wrap = 0, n_gcyc_wrap = 0, n_init1 = 0;
  int n_fall = 0, n_cal = 0, n_build = 0, n_meas = 0, n_recal = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- ring-oscillator TDCs ----------------
  task automatic ring_measure(int which, int k, logic iv);
    case (which)
      0: begin rns_init = iv;  rns_start = 0;  end
      1: begin gray_init = iv; gray_start = 0; end
      default: begin gcyc_init = iv; gcyc_start = 0; end
    endcase
    repeat (2) @(posedge dclk);
    #3000;
    case (which) 0: rns_start = 1; 1: gray_start = 1; default: gcyc_start = 1; endcase
    repeat (k) @(posedge dclk);
    #4000;
    case (which) 0: rns_stop = 1; 1: gray_stop = 1; default: gcyc_stop = 1; endcase
    #1000;
    if (iv) n_init1++;
    case (which)
      0: begin
        check($sformatf("rns x k=%0d", k), rns_x, k % 30);
        check($sformatf("rns a k=%0d", k), {rns_a1, rns_a2, rns_a3},
              {1'(k % 2), 2'(k % 3), 3'(k % 5)});
        if (k >= 30) n_rns_wrap++;
        rns_stop = 0;
      end
      1: begin
        check($sformatf("gray b k=%0d", k), gray_b, k % 16);
        check($sformatf("gray g k=%0d", k), gray_g, (k % 16) ^ ((k % 16) >> 1));
        if (k >= 16) n_gray_wrap++;
        gray_stop = 0;
      end
      default: begin
        check($sformatf("gcyc b k=%0d", k), gcyc_b, k % 64);
        check($sformatf("gcyc g k=%0d", k), gcyc_g, (k % 64) ^ ((k % 64) >> 1));
        if (k >= 64) n_gcyc_wrap++;
        gcyc_stop = 0;
      end
    endcase
  endtask

  // ---------------- stochastic TDC ----------------
  longint hist [M + 1];
  real    s_raw [NPTS], s_cor [NPTS];

  always @(posedge clk) begin
    if (rst_n && sto_raw_valid && sto_mode == MODE_CALIB) begin
      hist[sto_raw_code]++;
      if (!dut.u_sto.ph_r) n_fall++;
    end
  end

  function automatic longint expected_corr(int raw);
    longint cum = 0, total = 0;
    for (int i = 1; i <= M; i++) total += hist[i];
    for (int i = 1; i <= raw; i++) cum += hist[i];
    if (raw == 0) return 0;
    return (cum * M * 256) / total;
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

  task automatic calibrate();
    foreach (hist[i]) hist[i] = 0;
    @(negedge clk) sto_cal_req = 1;
    @(negedge clk) sto_cal_req = 0;
    #3000;
    while (sto_mode == MODE_CALIB) begin
      sto_stop = 1; #(3000 + $urandom % 997);
      sto_stop = 0; #(5000 + $urandom % 1009);
    end
    check("histogram total", longint'(sto_hist_samples), CAL);
    n_cal++;
    check("building", longint'(sto_mode), longint'(MODE_BUILD));
    n_build++;
    wait (sto_calibrated);
    @(posedge clk); #1;
    check("measuring", longint'(sto_mode), longint'(MODE_MEASURE));
  endtask

  task automatic sto_sweep(int step_count);
    for (int k = 0; k < step_count; k++) begin
      real dt;
      int  exp_raw;
      dt = 0.1 * k + 0.005;
      exp_raw = 0;
      for (int i = 0; i < M; i++) if (fe.offset(i) <= dt) exp_raw++;
      @(negedge clk);
      #100 sto_start = 1;
      #(dt) sto_stop = 1;
      while (!sto_corr_valid) @(posedge clk);
      #1;
      check($sformatf("sto raw dt=%f", dt), longint'(sto_raw_code), exp_raw);
      check($sformatf("sto corr dt=%f", dt), longint'(sto_corr_code), expected_corr(exp_raw));
      s_raw[k] = real'(sto_raw_code);
      s_cor[k] = real'(sto_corr_code) / 256.0;
      n_meas++;
      #2000 sto_stop = 0; sto_start = 0;
      #4000;
    end
  endtask

  initial begin
    real inl_raw, inl_cor;
    #3200 rst_n = 1;
    fork
      begin
        for (int iv = 0; iv < 2; iv++)
          for (int k = 0; k <= 65; k++) ring_measure(0, k, iv[0]);
      end
      begin
        for (int iv = 0; iv < 2; iv++)
          for (int k = 0; k <= 40; k++) ring_measure(1, k, iv[0]);
      end
      begin
        for (int k = 0; k <= 140; k++) ring_measure(2, k, k[0]);
      end
      begin
        #5000;
        check("idle before calibration", longint'(sto_mode), longint'(MODE_IDLE));
        calibrate();
        sto_sweep(NPTS);
        inl_raw = max_inl(1'b0);
        inl_cor = max_inl(1'b1);
        $display("stochastic TDC max |INL| (0.1 ps steps): raw %f corrected %f", inl_raw, inl_cor);
        check("INL improved", longint'(inl_cor < inl_raw), 1);
        calibrate();
        n_recal++;
        sto_sweep(50);
      end
    join
    check("RNS wrap happened", longint'(n_rns_wrap > 0), 1);
    check("Gray wrap happened", longint'(n_gray_wrap > 0), 1);
    check("Gray+cyclic wrap happened", longint'(n_gcyc_wrap > 0), 1);
    check("Initial Value 1 used", longint'(n_init1 > 0), 1);
    check("falling half-wave samples", longint'(n_fall > 0), 1);
    check("calibrations", longint'(n_cal >= 1), 1);
    check("table builds", longint'(n_build >= 1), 1);
    check("measurements", longint'(n_meas > 0), 1);
    check("recalibration", longint'(n_recal > 0), 1);
    $display("mechanisms: rns_wrap=%0d gray_wrap=%0d gcyc_wrap=%0d init1=%0d fall=%0d cal=%0d build=%0d meas=%0d recal=%0d",
             n_rns_wrap, n_gray_wrap, n_gcyc_wrap, n_init1, n_fall, n_cal, n_build, n_meas, n_recal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
