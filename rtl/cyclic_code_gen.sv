// cyclic_code_gen: 8-bit cyclic code generator giving the two low Gray bits.
//
// Eight flip-flops C0..C7 form a closed circular shift register (C0 takes
// C7, C(i) takes C(i-1)). While START is low C0..C3 are loaded with
// Initial Value and C4..C7 with its complement (code-word 00001111 for
// Initial Value 0); while START is high the word rotates by one position per
// delay-element period (one dclk edge). Every rotation of a cyclic code-word
// is again a code-word, and for 00001111: C1 equals Gray bit G1 and C0 xor
// C2 equals Gray bit G0, yet no C bit toggles faster than G1.
//
// The structure, initialisation and the G0/G1 mapping follow the document.
// That the register shifts once per tau of the companion ring oscillators is
// this design's reading (see the gray_cyclic_tdc header).
//
// Interface: dclk, start, init_val in; c[7:0] (c[0] = C0), g0, g1 out.
// The outputs are referenced to Initial Value 0 when init_val = 0; with
// init_val = 1 every bit is inverted, which leaves g0 unchanged and inverts
// g1.
module cyclic_code_gen (
  input  logic       dclk,
  input  logic       start,
  input  logic       init_val,
  output logic [7:0] c,
  output logic       g0,
  output logic       g1
);

  always_ff @(posedge dclk) begin
    if (!start) c <= {{4{~init_val}}, {4{init_val}}};
    else        c <= {c[6:0], c[7]};
  end

  assign g0 = c[0] ^ c[2];
  assign g1 = c[1];

endmodule
