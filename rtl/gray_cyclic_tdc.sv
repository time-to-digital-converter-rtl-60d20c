// gray_cyclic_tdc: N-bit Gray code TDC whose two low bits come from a cyclic
// code generator instead of ring oscillators.
//
// G0 and G1 are C0 xor C2 and C1 of an 8-bit cyclic code generator (code-word
// 00001111), so no generator output toggles faster than G1. The upper bits
// come from ring oscillators as in gray_tdc: G(k), 2 <= k < N-1, is output
// R(2^k - 1) of a ring of 2^(k+1) stages, and G(N-2), G(N-1) share a ring of
// 2^(N-1) stages. For the default N = 6: rings of 8, 16 and 32 stages and
// 8 + 4 = 12 flip-flops. On the rising edge of STOP all six Gray bits are
// captured at once and decoded to binary. N >= 4.
//
// Structure follows the document. The document gives the generator's delay
// element as 10 ns and the ring buffer delay as 20 ns in its prototype, but a
// valid Gray sequence requires the generator to advance once per ring stage
// delay; this design clocks both from dclk (one period = tau). Captured bits
// are referenced to Initial Value 0 by XOR with init_val (G0 needs no
// correction since both its generator bits invert together).
//
// Interface: dclk, start, init_val, stop in; g and b (binary) out.
// Timing: b counts dclk edges with start high before the stop edge, modulo
// 2^N; outputs change at stop rising edges.
// The generator's register word c and the ring stages that are not taps are
// read by nothing outside their loops; lint reports them as unused.
module gray_cyclic_tdc #(
  parameter int unsigned N = 6
) (
  input  logic         dclk,
  input  logic         start,
  input  logic         init_val,
  input  logic         stop,
  output logic [N-1:0] g,
  output logic [N-1:0] b
);

  logic [N-1:0] tap;
  logic [7:0]   cyc;
  logic         cg0, cg1;

  cyclic_code_gen u_cyc (.dclk, .start, .init_val, .c(cyc), .g0(cg0), .g1(cg1));

  assign tap[0] = cg0 ^ init_val;   // c0^c2 with both inverted is unchanged;
  assign tap[1] = cg1;              // the capture XOR below restores it

  for (genvar k = 2; k < int'(N) - 1; k++) begin : g_ring
    localparam int unsigned S = 2 ** (k + 1);
    logic [S-1:0] r;
    ring_osc #(.STAGES(S)) u_ro (.dclk, .start, .init_val, .r);
    assign tap[k] = r[(2 ** k) - 1];
    if (k == int'(N) - 2) begin : g_msb
      assign tap[N-1] = r[S-1];
    end
  end

  always_ff @(posedge stop) g <= tap ^ {N{init_val}};

  gray_decoder #(.N(N)) u_dec (.g, .b);

endmodule
