// gray_tdc: N-bit Gray code TDC built from parallel ring oscillators.
//
// A ring oscillator of S stages repeats every 2*S stage delays and exactly
// one stage output changes per delay, like one bit of a Gray code. Gray bit
// G(k), k < N-1, is the output R(2^k - 1) of a ring of 2^(k+1) stages; the
// top two bits G(N-2) and G(N-1) both come from one ring of 2^(N-1) stages
// (taps R(2^(N-2)-1) and R(2^(N-1)-1)). For N = 4 this is rings of 2, 4 and
// 8 stages: 14 delay cells, 4 sampling flip-flops, longest ring 8 stages.
// On the rising edge of STOP only the N tapped outputs are captured; the
// Gray word is decoded to binary. Because only one captured bit changes per
// stage delay, a late or early stage shifts a code edge but cannot produce
// an out-of-sequence code.
//
// Ring sizes, taps, capture and decoder follow the document; stages are
// flip-flops clocked by dclk (one dclk period = tau) as in its FPGA
// prototype. Captured bits are XORed with init_val so that both Initial
// Values give the same code (this design's choice). N >= 2.
//
// Interface: dclk, start, init_val, stop in; g (captured Gray code) and b
// (binary code) out. Timing: b counts the dclk edges at which start was high
// before the stop edge, modulo 2^N; outputs change at stop rising edges.
// Ring stages that are not taps are read by nothing outside their rings;
// lint reports them as unused.
module gray_tdc #(
  parameter int unsigned N = 4
) (
  input  logic         dclk,
  input  logic         start,
  input  logic         init_val,
  input  logic         stop,
  output logic [N-1:0] g,
  output logic [N-1:0] b
);

  logic [N-1:0] tap;

  for (genvar k = 0; k < int'(N) - 1; k++) begin : g_ring
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
