// ring_osc: ring oscillator of STAGES delay stages closed by an inverter
// (stage outputs R0..R(STAGES-1), fed back as R0 <= ~R(STAGES-1)).
//
// Each delay stage is a flip-flop clocked by dclk, so one dclk period is the
// buffer delay tau; this is how the delay buffers are realised in the FPGA
// prototypes of the parallel ring-oscillator TDCs. While start is low every
// stage is held at init_val ("Initial Value"); from the first dclk edge at
// which start is high the ring runs, one stage changing per tau, and the
// state sequence repeats every 2*STAGES*tau (for init_val=0: 0..0, 10..0,
// 110..0, ..., 1..1, 01..1, ..., 0..01).
//
// Interface: dclk, start, init_val in; r[STAGES-1:0] out (r[0] = R0).
// Timing: r changes one bit per dclk edge while start is high.
module ring_osc #(
  parameter int unsigned STAGES = 8
) (
  input  logic              dclk,
  input  logic              start,
  input  logic              init_val,
  output logic [STAGES-1:0] r
);

  always_ff @(posedge dclk) begin
    if (!start) r <= {STAGES{init_val}};
    else if (STAGES == 1) r[0] <= ~r[STAGES-1];
    else r <= {r[STAGES-2:0], ~r[STAGES-1]};
  end

endmodule
