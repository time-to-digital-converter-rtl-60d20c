// rns_tdc: residue-number-system TDC. Three ring oscillators of M1, M2 and
// M3 stages (pairwise coprime, default 2, 3, 5) start together on the rising
// edge of START. Each ring's state repeats every 2*M_k stage delays, so its
// state gives the elapsed time modulo M_k stage delays: a natural residue
// generator. On the rising edge of STOP all M1+M2+M3 stage outputs are
// captured in flip-flops, each ring's word is turned into its residue a_k,
// and the residues are turned into x by the Chinese remainder theorem. The
// START-to-STOP interval is x * tau for x in 0 .. M1*M2*M3-1 (30 levels with
// 10 delay cells and 10 flip-flops in the default).
//
// Structure and the five-step operation follow the document. The delay
// stages are flip-flops clocked by dclk (one dclk period = tau), as in the
// FPGA prototype. Captured bits are XORed with init_val so that both
// Initial Values give the same code (this design's choice).
//
// Interface: dclk (stage clock), start, init_val, stop (capture clock);
// outputs a1, a2, a3 (residues) and x, valid from the first stop edge on.
// Timing: x counts the dclk edges at which start was high before the stop
// edge, modulo M1*M2*M3; outputs change only at stop rising edges.
module rns_tdc #(
  parameter int unsigned M1 = 2,
  parameter int unsigned M2 = 3,
  parameter int unsigned M3 = 5,
  localparam int unsigned A1W = (M1 > 1) ? $clog2(M1) : 1,
  localparam int unsigned A2W = (M2 > 1) ? $clog2(M2) : 1,
  localparam int unsigned A3W = (M3 > 1) ? $clog2(M3) : 1,
  localparam int unsigned XW  = $clog2(M1 * M2 * M3)
) (
  input  logic           dclk,
  input  logic           start,
  input  logic           init_val,
  input  logic           stop,
  output logic [A1W-1:0] a1,
  output logic [A2W-1:0] a2,
  output logic [A3W-1:0] a3,
  output logic [XW-1:0]  x
);

  logic [M1-1:0] r1, q1;
  logic [M2-1:0] r2, q2;
  logic [M3-1:0] r3, q3;

  ring_osc #(.STAGES(M1)) u_ro1 (.dclk, .start, .init_val, .r(r1));
  ring_osc #(.STAGES(M2)) u_ro2 (.dclk, .start, .init_val, .r(r2));
  ring_osc #(.STAGES(M3)) u_ro3 (.dclk, .start, .init_val, .r(r3));

  // STOP-clocked sampling flip-flops, one per delay stage.
  always_ff @(posedge stop) begin
    q1 <= r1 ^ {M1{init_val}};
    q2 <= r2 ^ {M2{init_val}};
    q3 <= r3 ^ {M3{init_val}};
  end

  residue_encoder #(.M(M1)) u_enc1 (.q(q1), .a(a1));
  residue_encoder #(.M(M2)) u_enc2 (.q(q2), .a(a2));
  residue_encoder #(.M(M3)) u_enc3 (.q(q3), .a(a3));

  crt_decoder #(.M1(M1), .M2(M2), .M3(M3)) u_crt (.a1, .a2, .a3, .x);

endmodule
