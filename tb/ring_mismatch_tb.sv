// ring_mismatch_tb: effect of stage-delay mismatch on the RNS and Gray code
// converters, using buffer-ring models in continuous time and the RTL
// decoders (residue_encoder, crt_decoder, gray_decoder).
//
// For each STOP time t (0.3 ns to 1000.3 ns after START, 1 ns steps) the ring
// states are captured and decoded:
//   - RNS, all buffers 20 ns: x must equal floor(t / 20 ns) mod 30;
//   - RNS, mod-2 ring buffers 20.5 ns, others 20 ns: x must show
//     out-of-sequence codes (a step that is neither 0 nor +1), because the
//     residues no longer change together;
//   - 4-bit Gray, 2-stage ring buffers 20.5 ns, 4- and 8-stage rings 20 ns:
//     every G1 edge sits in the middle of a G0 pulse two stages wide, so
//     the skew may grow to one stage delay (20 ns, reached at t = 800 ns)
//     before a G1 edge crosses a G0 edge. Up to t = 790 ns the binary code
//     may only hold or step by +1; from t = 810 ns out-of-sequence codes
//     are expected.
// Counts of out-of-sequence codes are printed.
`timescale 1ns/1ps
module ring_mismatch_tb;
  int checks = 0, failures = 0;
  logic start = 0;
  localparam logic INIT = 1'b0;

  // ideal RNS rings
  logic [1:0] i2; logic [2:0] i3; logic [4:0] i5;
  ring_delay_model #(.STAGES(2), .DELAY_NS(20.0)) ri2 (.start, .init_val(INIT), .r(i2));
  ring_delay_model #(.STAGES(3), .DELAY_NS(20.0)) ri3 (.start, .init_val(INIT), .r(i3));
  ring_delay_model #(.STAGES(5), .DELAY_NS(20.0)) ri5 (.start, .init_val(INIT), .r(i5));
  // mismatched RNS rings
  logic [1:0] m2; logic [2:0] m3; logic [4:0] m5;
  ring_delay_model #(.STAGES(2), .DELAY_NS(20.5)) rm2 (.start, .init_val(INIT), .r(m2));
  ring_delay_model #(.STAGES(3), .DELAY_NS(20.0)) rm3 (.start, .init_val(INIT), .r(m3));
  ring_delay_model #(.STAGES(5), .DELAY_NS(20.0)) rm5 (.start, .init_val(INIT), .r(m5));
  // mismatched Gray rings
  logic [1:0] g2; logic [3:0] g4; logic [7:0] g8;
  ring_delay_model #(.STAGES(2), .DELAY_NS(20.5)) rg2 (.start, .init_val(INIT), .r(g2));
  ring_delay_model #(.STAGES(4), .DELAY_NS(20.0)) rg4 (.start, .init_val(INIT), .r(g4));
  ring_delay_model #(.STAGES(8), .DELAY_NS(20.0)) rg8 (.start, .init_val(INIT), .r(g8));

  // captured states and RTL decoders
  logic [1:0] ci2, cm2; logic [2:0] ci3, cm3; logic [4:0] ci5, cm5;
  logic [3:0] cg;
  logic [0:0] ai1, am1; logic [1:0] ai2, am2; logic [2:0] ai3, am3;
  logic [4:0] xi, xm;
  logic [3:0] gb;

  residue_encoder #(.M(2)) ei1 (.q(ci2), .a(ai1));
  residue_encoder #(.M(3)) ei2 (.q(ci3), .a(ai2));
  residue_encoder #(.M(5)) ei3 (.q(ci5), .a(ai3));
  crt_decoder     #(.M1(2), .M2(3), .M3(5)) di (.a1(ai1), .a2(ai2), .a3(ai3), .x(xi));
  residue_encoder #(.M(2)) em1 (.q(cm2), .a(am1));
  residue_encoder #(.M(3)) em2 (.q(cm3), .a(am2));
  residue_encoder #(.M(5)) em3 (.q(cm5), .a(am3));
  crt_decoder     #(.M1(2), .M2(3), .M3(5)) dm (.a1(am1), .a2(am2), .a3(am3), .x(xm));
  gray_decoder    #(.N(4)) dg (.g(cg), .b(gb));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int  prev_xm, prev_gb, rns_glitch, gray_glitch_in, gray_glitch_out, step;
    real t;
    prev_xm = 0; prev_gb = 0;
    rns_glitch = 0; gray_glitch_in = 0; gray_glitch_out = 0;
    {ci2, ci3, ci5, cm2, cm3, cm5, cg} = '0;
    for (int k = 0; k <= 1000; k++) begin
      t = 0.3 + real'(k);
      start = 0;
      #50;
      start = 1;
      #(t);
      ci2 = i2; ci3 = i3; ci5 = i5;
      cm2 = m2; cm3 = m3; cm5 = m5;
      cg  = {g8[7], g8[3], g4[1], g2[0]};
      #1;
      check($sformatf("ideal RNS t=%0.1f", t), longint'(xi), longint'(($floor(t / 20.0))) % 30);
      if (k > 0) begin
        step = (int'(xm) - prev_xm + 30) % 30;
        if (step > 1) rns_glitch++;
        step = (int'(gb) - prev_gb + 16) % 16;
        if (step > 1) begin
          if (t < 790.0)       gray_glitch_in++;
          else if (t >= 810.0) gray_glitch_out++;
        end
      end
      prev_xm = int'(xm);
      prev_gb = int'(gb);
    end
    $display("RNS with 0.5 ns mismatch: %0d out-of-sequence codes", rns_glitch);
    $display("Gray with 0.5 ns mismatch: %0d out-of-sequence codes while skew < 20 ns, %0d beyond",
             gray_glitch_in, gray_glitch_out);
    check("RNS mismatch produces glitches", longint'(rns_glitch > 0), 1);
    check("Gray glitch-free within the allowed skew", gray_glitch_in, 0);
    check("Gray glitches beyond the allowed skew", longint'(gray_glitch_out > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
