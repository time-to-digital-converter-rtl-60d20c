// stoch_tdc: digital part of the stochastic TDC with self-calibration.
//
// The analog front end (delay line, SEL multiplexer, calibration ring
// oscillator and an array of M flip-flops whose setup/hold times vary
// randomly from device to device) is outside this module: its M outputs q
// and the captured line level (phase) come in, and sel goes out to it.
// Because the flip-flops' sampling instants are spread randomly around the
// same edge, counting how many of them saw the edge measures the
// START-to-STOP interval with a step far below one gate delay, but with
// random code widths. The back end removes that nonlinearity:
//   calibration  -- sel = 1, the line runs as a ring oscillator unrelated to
//                   STOP, so each sample lands at a uniformly random time
//                   and the histogram of raw codes gives each code's width;
//   measurement  -- sel = 0, START drives the line, and each raw code is
//                   replaced by FS * cumulative histogram / total.
// Blocks: STOP synchroniser -> sample register -> ones_counter ->
// histogram_engine (calibration) / error_correction (measurement), with
// stoch_ctrl choosing the mode. FS = M = 400 flip-flops by default (the
// largest array evaluated in the document).
//
// STOP is asynchronous to clk: it is synchronised with two flip-flops and its
// rising edge makes the back end take q and phase, which the front end holds
// from one STOP edge to the next. STOP must therefore stay high and low for
// at least two clk periods each, and samples must be at least four clk
// periods apart. This synchronisation scheme is this design's choice.
//
// Interface: clk, rst_n, stop, q, phase, cal_req in; sel, mode, raw_code,
// raw_valid, corr_code, corr_valid, calibrated, hist_samples (samples in
// the current histogram) out. corr_code has FRAC
// fraction bits. Latency: raw_valid 4 clk cycles after the STOP edge,
// corr_valid one cycle later.
module stoch_tdc
  import tdc_pkg::*;
#(
  parameter int unsigned M           = 400,
  parameter int unsigned CW          = 17,
  parameter int unsigned FRAC        = 8,
  parameter int unsigned CAL_SAMPLES = 65536,
  localparam int unsigned CODEW = $clog2(M + 1),
  localparam int unsigned OUTW  = CODEW + FRAC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stop,
  input  logic [M-1:0]     q,
  input  logic             phase,
  input  logic             cal_req,
  output logic             sel,
  output stoch_mode_e      mode,
  output logic [CODEW-1:0] raw_code,
  output logic             raw_valid,
  output logic [OUTW-1:0]  corr_code,
  output logic             corr_valid,
  output logic             calibrated,
  output logic [CW-1:0]    hist_samples
);

  // STOP synchroniser and edge detector
  logic [2:0] stop_sync;
  logic       take;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stop_sync <= '0;
    else        stop_sync <= {stop_sync[1:0], stop};
  end
  assign take = stop_sync[1] && !stop_sync[2];

  // Sample register: q and phase are stable since the STOP edge
  logic [M-1:0] q_r;
  logic         ph_r, take_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r <= '0; ph_r <= 1'b1; take_d <= 1'b0;
    end else begin
      take_d <= take;
      if (take) begin
        q_r  <= q;
        ph_r <= phase;
      end
    end
  end

  logic [CODEW-1:0] code_c;
  ones_counter #(.M(M)) u_cnt (.q(q_r), .phase(ph_r), .code(code_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw_code <= '0; raw_valid <= 1'b0;
    end else begin
      raw_valid <= take_d;
      if (take_d) raw_code <= code_c;
    end
  end

  logic             hist_clear, hist_inc, build, build_busy;
  logic [CODEW-1:0] hist_addr;
  logic [CW-1:0]    hist_data;

  stoch_ctrl #(.CAL_SAMPLES(CAL_SAMPLES)) u_ctrl (
    .clk, .rst_n, .cal_req,
    .sample    (raw_valid),
    .build_busy(build_busy),
    .mode, .sel,
    .hist_clear(hist_clear),
    .hist_inc  (hist_inc),
    .build     (build)
  );

  histogram_engine #(.BINS(M + 1), .CW(CW)) u_hist (
    .clk, .rst_n,
    .clear  (hist_clear),
    .inc    (hist_inc),
    .code   (raw_code),
    .rd_addr(hist_addr),
    .rd_data(hist_data),
    .total  (hist_samples)
  );

  error_correction #(.FS(M), .CW(CW), .FRAC(FRAC)) u_corr (
    .clk, .rst_n,
    .build     (build),
    .hist_addr (hist_addr),
    .hist_data (hist_data),
    .raw_code  (raw_code),
    .raw_valid (raw_valid && mode == MODE_MEASURE),
    .busy      (build_busy),
    .ready     (calibrated),
    .corr      (corr_code),
    .corr_valid(corr_valid)
  );

endmodule
