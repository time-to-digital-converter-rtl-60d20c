// tdc_top: the four time-to-digital converters side by side.
//
//   rns_*   residue-number-system TDC, ring oscillators of 2, 3 and 5
//           stages: 30 levels of tau from 10 delay cells and 10 flip-flops;
//   gray_*  4-bit Gray code TDC, rings of 2, 4 and 8 stages;
//   gcyc_*  6-bit Gray code TDC whose two low bits come from a cyclic code
//           generator, rings of 8, 16 and 32 stages;
//   sto_*   digital back end of the 400-flip-flop stochastic TDC with
//           histogram self-calibration; its analog front end (delay line,
//           calibration ring oscillator, randomly varying flip-flop array)
//           connects through sto_q, sto_phase and sto_sel.
// The designs share nothing but their clocks: dclk, whose period is the
// stage delay tau of the three ring-oscillator TDCs, and clk for the
// stochastic back end. Each has its own START, STOP and Initial Value.
// See the individual modules for the timing of each.
module tdc_top
  import tdc_pkg::*;
(
  input  logic         dclk,
  input  logic         clk,
  input  logic         rst_n,
  // residue-number-system TDC
  input  logic         rns_start,
  input  logic         rns_init,
  input  logic         rns_stop,
  output logic [0:0]   rns_a1,
  output logic [1:0]   rns_a2,
  output logic [2:0]   rns_a3,
  output logic [4:0]   rns_x,
  // Gray code TDC
  input  logic         gray_start,
  input  logic         gray_init,
  input  logic         gray_stop,
  output logic [3:0]   gray_g,
  output logic [3:0]   gray_b,
  // Gray code TDC with cyclic code
  input  logic         gcyc_start,
  input  logic         gcyc_init,
  input  logic         gcyc_stop,
  output logic [5:0]   gcyc_g,
  output logic [5:0]   gcyc_b,
  // stochastic TDC back end
  input  logic         sto_stop,
  input  logic [399:0] sto_q,
  input  logic         sto_phase,
  input  logic         sto_cal_req,
  output logic         sto_sel,
  output stoch_mode_e  sto_mode,
  output logic [8:0]   sto_raw_code,
  output logic         sto_raw_valid,
  output logic [16:0]  sto_corr_code,
  output logic         sto_corr_valid,
  output logic         sto_calibrated,
  output logic [16:0]  sto_hist_samples
);

  rns_tdc u_rns (
    .dclk, .start(rns_start), .init_val(rns_init), .stop(rns_stop),
    .a1(rns_a1), .a2(rns_a2), .a3(rns_a3), .x(rns_x)
  );

  gray_tdc u_gray (
    .dclk, .start(gray_start), .init_val(gray_init), .stop(gray_stop),
    .g(gray_g), .b(gray_b)
  );

  gray_cyclic_tdc u_gcyc (
    .dclk, .start(gcyc_start), .init_val(gcyc_init), .stop(gcyc_stop),
    .g(gcyc_g), .b(gcyc_b)
  );

  stoch_tdc u_sto (
    .clk, .rst_n,
    .stop        (sto_stop),
    .q           (sto_q),
    .phase       (sto_phase),
    .cal_req     (sto_cal_req),
    .sel         (sto_sel),
    .mode        (sto_mode),
    .raw_code    (sto_raw_code),
    .raw_valid   (sto_raw_valid),
    .corr_code   (sto_corr_code),
    .corr_valid  (sto_corr_valid),
    .calibrated  (sto_calibrated),
    .hist_samples(sto_hist_samples)
  );

endmodule
