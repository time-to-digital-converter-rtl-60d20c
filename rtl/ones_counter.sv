// ones_counter: the "# of 1s counter" of the stochastic TDC. It turns the
// M outputs of the stochastic DFF array into the raw TDC code.
//
// Because the sampling instants of the DFFs are spread randomly, their
// outputs do not form a clean thermometer code; the number of DFFs that saw
// the edge is the code. During calibration the delay line is driven by a
// free-running ring oscillator, so STOP may land just after a falling edge of
// the line; the DFFs that have seen that edge then read 0. The phase input
// is the line level captured by STOP (1 after a rising edge, 0 after a
// falling one): the code is the number of ones for phase = 1 and the number
// of zeros for phase = 0, so both half-waves measure the elapsed time the
// same way. In measurement mode phase is the START level, i.e. 1. Counting
// ones follows the document; the phase-dependent count is this design's.
//
// Interface: q[M-1:0], phase in; code (0..M) out. Combinational.
module ones_counter #(
  parameter int unsigned M = 400,
  localparam int unsigned CODEW = $clog2(M + 1)
) (
  input  logic [M-1:0]     q,
  input  logic             phase,
  output logic [CODEW-1:0] code
);

  logic [CODEW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(M); i++) ones += CODEW'(q[i]);
    code = phase ? ones : CODEW'(M - ones);
  end

endmodule
