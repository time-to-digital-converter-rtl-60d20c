// residue_encoder: turns the captured state of an M-stage ring oscillator
// into the residue a = (elapsed stage delays) mod M.
//
// A ring of M stages started from all zeros walks through 2M states:
// k ones filling from R0 (k = 0..M-1), then k zeros filling from R0. If the
// last stage is 0 the residue is the number of ones, otherwise it is the
// number of zeros (M minus the number of ones). The ring's state is expected
// to be referenced to Initial Value = 0; the caller XORs the captured bits
// with the Initial Value first. The step itself is the document's ("the Q
// values are transferred into the residues by the encoders"); the counting
// rule is this design's.
//
// Interface: q[M-1:0] in, a out (combinational).
module residue_encoder #(
  parameter int unsigned M = 5,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1
) (
  input  logic [M-1:0]  q,
  output logic [AW-1:0] a
);

  logic [$clog2(M+1)-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(M); i++) ones += $bits(ones)'(q[i]);
    if (q[M-1]) a = AW'(M - ones);
    else        a = AW'(ones);
  end

endmodule
