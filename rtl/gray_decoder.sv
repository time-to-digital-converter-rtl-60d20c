// gray_decoder: reflected-binary Gray code to natural binary.
//
// B(N-1) = G(N-1) and B(k) = B(k+1) xor G(k) for the lower bits, i.e. each
// binary bit is the XOR of all Gray bits at and above it. Purely
// combinational. Interface: g[N-1:0] in, b[N-1:0] out.
module gray_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] g,
  output logic [N-1:0] b
);

  always_comb begin
    b[N-1] = g[N-1];
    for (int k = int'(N) - 2; k >= 0; k--) b[k] = b[k+1] ^ g[k];
  end

endmodule
