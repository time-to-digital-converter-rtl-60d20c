// crt_decoder: reconstructs x (0 <= x < N = m1*m2*m3) from its residues
// a_k = x mod m_k with the Chinese remainder theorem,
// x = (a1*w1 + a2*w2 + a3*w3) mod N, w_k = (N/m_k)*((N/m_k)^-1 mod m_k).
//
// The moduli must be pairwise coprime. The weights are computed at
// elaboration time (tdc_pkg::crt_weight); the weighted sum is below
// N*(m1+m2+m3), so the final reduction is a modulo by a constant on a small
// word. The whole decoder is combinational. Three moduli, as in the
// residue-number-system TDC; default 2, 3, 5 (N = 30).
//
// Interface: a1, a2, a3 in; x out.
module crt_decoder
  import tdc_pkg::*;
#(
  parameter int unsigned M1 = 2,
  parameter int unsigned M2 = 3,
  parameter int unsigned M3 = 5,
  localparam int unsigned NPROD = M1 * M2 * M3,
  localparam int unsigned A1W = (M1 > 1) ? $clog2(M1) : 1,
  localparam int unsigned A2W = (M2 > 1) ? $clog2(M2) : 1,
  localparam int unsigned A3W = (M3 > 1) ? $clog2(M3) : 1,
  localparam int unsigned XW  = $clog2(NPROD)
) (
  input  logic [A1W-1:0] a1,
  input  logic [A2W-1:0] a2,
  input  logic [A3W-1:0] a3,
  output logic [XW-1:0]  x
);

  localparam int unsigned W1 = crt_weight(NPROD, M1);
  localparam int unsigned W2 = crt_weight(NPROD, M2);
  localparam int unsigned W3 = crt_weight(NPROD, M3);
  localparam int unsigned SW = $clog2(NPROD * (M1 + M2 + M3) + 1);

  logic [SW-1:0] sum;

  always_comb begin
    sum = SW'(a1) * SW'(W1) + SW'(a2) * SW'(W2) + SW'(a3) * SW'(W3);
    x   = XW'(sum % SW'(NPROD));
  end

endmodule
