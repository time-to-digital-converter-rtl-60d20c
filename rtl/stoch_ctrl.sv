// stoch_ctrl: mode controller of the stochastic TDC.
//
// The converter has a calibration mode, in which SEL closes the delay line
// into a free-running ring oscillator and every STOP sample is added to the
// histogram, and a measurement mode, in which SEL routes START into the
// delay line and every sample is corrected. This controller sequences them:
//   IDLE    -- after reset; samples are passed on uncorrected.
//   CALIB   -- entered on cal_req: clears the histogram, sets sel, counts
//              CAL_SAMPLES samples into it.
//   BUILD   -- sel low again; starts the correction-table build and waits.
//   MEASURE -- the table is ready; samples are corrected. A new cal_req
//              recalibrates.
// The two modes and the SEL multiplexer are the document's; the sequencing,
// the fixed calibration length and the request input are this design's.
//
// Interface: clk, rst_n, cal_req, sample (one pulse per STOP sample),
// build_busy in; mode, sel, hist_clear, hist_inc, build out.
// Timing: hist_clear is a one-cycle pulse on entering CALIB; build a
// one-cycle pulse on entering BUILD.
module stoch_ctrl
  import tdc_pkg::*;
#(
  parameter int unsigned CAL_SAMPLES = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cal_req,
  input  logic        sample,
  input  logic        build_busy,
  output stoch_mode_e mode,
  output logic        sel,
  output logic        hist_clear,
  output logic        hist_inc,
  output logic        build
);

  logic [$clog2(CAL_SAMPLES+1)-1:0] count;
  logic                             build_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_IDLE;
      count      <= '0;
      hist_clear <= 1'b0;
      build      <= 1'b0;
      build_seen <= 1'b0;
    end else begin
      hist_clear <= 1'b0;
      build      <= 1'b0;
      unique case (mode)
        MODE_IDLE, MODE_MEASURE: if (cal_req) begin
          mode       <= MODE_CALIB;
          count      <= '0;
          hist_clear <= 1'b1;
        end
        MODE_CALIB: if (sample && !hist_clear) begin
          if (32'(count) == CAL_SAMPLES - 1) begin
            mode       <= MODE_BUILD;
            build      <= 1'b1;
            build_seen <= 1'b0;
          end
          count <= count + 1'b1;
        end
        MODE_BUILD: begin
          if (build_busy) build_seen <= 1'b1;
          if (build_seen && !build_busy) mode <= MODE_MEASURE;
        end
        default: mode <= MODE_IDLE;
      endcase
    end
  end

  assign sel      = (mode == MODE_CALIB);
  assign hist_inc = (mode == MODE_CALIB) && sample && !hist_clear;

endmodule
