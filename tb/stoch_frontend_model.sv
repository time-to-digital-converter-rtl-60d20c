// stoch_frontend_model: behavioural model (not synthesizable) of the analog
// front end of the stochastic TDC.
//
// The front end is a delay line feeding an array of M flip-flops, all
// clocked by STOP. Process variation gives every flip-flop its own
// effective sampling offset (setup/hold time) o_i, normally distributed
// around one buffer delay; flip-flop i therefore reads the new line level
// if the line edge came at least o_i before STOP. A multiplexer (sel)
// chooses the line input: START in measurement mode (sel = 0), or the
// line's own inverted output in calibration mode (sel = 1), closing a ring
// oscillator whose half period is the delay of two dummy buffers
// (RING_HALF_PS, default 2 x 20 ps). The ring is unrelated to STOP, so in
// calibration each STOP samples the line at a random time.
//
// The offsets are read from OFFSET_FILE (hex femtoseconds, one per line,
// the first M entries used) or, if it is empty, drawn from an approximate
// normal distribution N(MEAN_PS, SD_PS) with SEED. Only the most recent line
// edge is modelled, so RING_HALF_PS must exceed the largest offset.
//
// Ports: start, stop, sel in; q[M-1:0] (flip-flop outputs, held from one
// STOP edge to the next) and phase (line level captured by STOP) out.
`timescale 1ps/1fs
module stoch_frontend_model #(
  parameter int    M            = 400,
  parameter string OFFSET_FILE  = "",
  parameter real   RING_HALF_PS = 40.0,
  parameter real   MEAN_PS      = 20.0,
  parameter real   SD_PS        = 6.0,
  parameter int    SEED         = 1
) (
  input  logic         start,
  input  logic         stop,
  input  logic         sel,
  output logic [M-1:0] q,
  output logic         phase
);

  logic [19:0] off_fs [400];
  real         off_ps [M];
  logic        ring = 1'b0;
  logic        line;
  realtime     t_edge = 0.0;
  logic        lvl = 1'b0;

  initial begin
    if (OFFSET_FILE != "") begin
      $readmemh(OFFSET_FILE, off_fs);
      for (int i = 0; i < M; i++) off_ps[i] = real'(off_fs[i % 400]) / 1000.0;
    end else begin
      int unsigned s;
      s = $urandom(SEED);
      for (int i = 0; i < M; i++) begin
        real u;
        u = 0.0;
        for (int j = 0; j < 12; j++) u += real'($urandom % 100000) / 100000.0;
        off_ps[i] = MEAN_PS + SD_PS * (u - 6.0);
        if (off_ps[i] < 0.01) off_ps[i] = 0.01;
      end
    end
    q     = '0;
    phase = 1'b0;
  end

  // calibration ring oscillator: held low while sel is low
  always begin
    wait (sel);
    #(RING_HALF_PS);
    if (sel) ring = ~ring;
  end
  always @(negedge sel) ring = 1'b0;

  assign line = sel ? ring : start;

  always @(posedge line or negedge line) begin
    t_edge = $realtime;
    lvl    = line;
  end

  always @(posedge stop) begin
    realtime e;
    e = $realtime - t_edge;
    for (int i = 0; i < M; i++) q[i] <= (e >= off_ps[i]) ? lvl : ~lvl;
    phase <= lvl;
  end

  function automatic real offset(int i);
    return off_ps[i];
  endfunction

endmodule
