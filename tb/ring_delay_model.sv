// ring_delay_model: behavioural model (not synthesizable) of a ring
// oscillator built from real buffers: STAGES buffers of DELAY_NS each and an
// inverter (taken as zero delay) closing the loop.
//
// While start is low every stage output equals init_val. From the rising
// edge of start the wavefront advances one stage every DELAY_NS, so the
// outputs walk the same 2*STAGES-state sequence as ring_osc, but in
// continuous time, and rings with different DELAY_NS drift apart. This is
// used to study stage-delay mismatch between parallel rings.
//
// Ports: start, init_val in; r[STAGES-1:0] (r[0] = R0) out.
`timescale 1ns/1ps
module ring_delay_model #(
  parameter int  STAGES   = 8,
  parameter real DELAY_NS = 20.0
) (
  input  logic              start,
  input  logic              init_val,
  output logic [STAGES-1:0] r
);
  initial r = '0;

  always @(start or init_val) if (!start) r = {STAGES{init_val}};

  always begin
    wait (start);
    #(DELAY_NS);
    if (start) begin
      if (STAGES == 1) r = ~r;
      else             r = {r[STAGES-2:0], ~r[STAGES-1]};
    end
  end
endmodule
