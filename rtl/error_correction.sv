// error_correction: digital error correction of the stochastic TDC.
//
// After calibration the histogram Pin(i) of the raw codes is proportional
// to the time width of each code. The corrected output for raw code N is
//     Dout(N) = FS * sum_{i=1..N} Pin(i) / sum_{i=1..FS} Pin(i),
// i.e. the normalised cumulative histogram, which maps each raw code to the
// (relative) time at its upper edge and so linearises the converter.
//
// Build: a pulse on build walks the histogram through the hist_addr /
// hist_data port, first summing Pin(1..FS), then accumulating the
// cumulative sum code by code and dividing (seq_divider) to fill a table of
// FS+1 entries with Dout(N) in fixed point (FRAC fraction bits, floor).
// Dout(0) = 0. If no sample was counted the table becomes the identity.
// Measurement: each raw_valid raw_code is looked up; corr and corr_valid
// follow one cycle later, but only once the table is ready.
//
// The formula is the document's; the table, fixed-point format and divider
// are this design's.
//
// Interface: clk, rst_n, build, hist_data, raw_code, raw_valid in;
// hist_addr, busy, ready, corr, corr_valid out.
// Timing: a build takes about FS + (FS+1)*(DW+3) cycles (DW = divider
// width); a lookup takes one cycle.
// Only the low bits of the divider quotient are kept (Dout(N) never exceeds
// FS * 2^FRAC) and the divider's busy flag is not needed (the build waits
// for done); lint reports both as unused.
module error_correction #(
  parameter int unsigned FS   = 400,
  parameter int unsigned CW   = 17,
  parameter int unsigned FRAC = 8,
  localparam int unsigned AW   = $clog2(FS + 1),
  localparam int unsigned OUTW = AW + FRAC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            build,
  output logic [AW-1:0]   hist_addr,
  input  logic [CW-1:0]   hist_data,
  input  logic [AW-1:0]   raw_code,
  input  logic            raw_valid,
  output logic            busy,
  output logic            ready,
  output logic [OUTW-1:0] corr,
  output logic            corr_valid
);

  localparam int unsigned SUMW = CW + AW;
  localparam int unsigned DW   = SUMW + AW + FRAC;

  typedef enum logic [2:0] {S_IDLE, S_SUM, S_CUM, S_DIV, S_WAIT} state_e;
  state_e state;

  logic [OUTW-1:0] lut [FS + 1];
  logic [SUMW-1:0] total, cum;
  logic [AW-1:0]   idx;

  logic          div_start, div_done;
  logic [DW-1:0] div_q;
  logic          div_busy;

  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n,
    .start   (div_start),
    .dividend((DW'(cum) * DW'(FS)) << FRAC),
    .divisor (DW'(total)),
    .quotient(div_q),
    .busy    (div_busy),
    .done    (div_done)
  );

  assign hist_addr = idx;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      total     <= '0;
      cum       <= '0;
      ready     <= 1'b0;
      div_start <= 1'b0;
    end else begin
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (build) begin
          ready <= 1'b0;
          total <= '0;
          idx   <= AW'(1);
          state <= S_SUM;
        end
        // total = sum of Pin(1..FS)
        S_SUM: begin
          total <= total + SUMW'(hist_data);
          if (32'(idx) == FS) begin
            idx   <= '0;
            cum   <= '0;
            state <= S_CUM;
          end else idx <= idx + 1'b1;
        end
        // cum = sum of Pin(1..idx); Dout(0) = 0
        S_CUM: begin
          if (idx == '0) begin
            lut[0] <= '0;
            idx    <= AW'(1);
          end else begin
            cum   <= cum + SUMW'(hist_data);
            state <= S_DIV;
          end
        end
        S_DIV: begin
          if (total == '0) begin
            lut[idx] <= OUTW'(idx) << FRAC;
            state    <= S_WAIT;
          end else begin
            div_start <= 1'b1;
            state     <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (total == '0 || div_done) begin
            if (total != '0) lut[idx] <= OUTW'(div_q);
            if (32'(idx) == FS) begin
              ready <= 1'b1;
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_CUM;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr       <= '0;
      corr_valid <= 1'b0;
    end else begin
      corr_valid <= raw_valid && ready;
      if (raw_valid && ready) corr <= lut[raw_code];
    end
  end

endmodule
