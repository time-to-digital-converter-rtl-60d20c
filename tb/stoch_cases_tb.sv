// stoch_cases_tb: runs the stochastic TDC over all delay-variation cases.
//
// Eight independent runs (stoch_case_run) proceed in parallel:
//   case 1 with 100, 200 and 400 flip-flops (columns 1-2, 1-4 and 1-8 of
//   its offset table), and cases 2 to 6 with 400 flip-flops.
// Cases 1-3 have offsets with a standard deviation of about 6 ps, cases 4, 5
// and 6 of about 1, 2 and 3 ps, all around 20 ps. Each run checks every raw
// and corrected code of a 0-42 ps sweep after calibration with 16384
// samples, and that correction lowers the worst INL. The testbench prints
// worst |INL| before and after correction and the resolution of each run,
// and checks that the resolution halves as the flip-flop count doubles.
`timescale 1ps/1fs
module stoch_cases_tb;
  localparam int NR = 8;
  int  checks = 0, failures = 0;
  logic done [NR];
  int   rc [NR], rf [NR];
  real  ir [NR], ic [NR], rs [NR];

  stoch_case_run #(.M(100), .OFFSET_FILE("tb/stoch_case1_offsets.mem"), .SEED(11)) r0 (done[0], rc[0], rf[0], ir[0], ic[0], rs[0]);
  stoch_case_run #(.M(200), .OFFSET_FILE("tb/stoch_case1_offsets.mem"), .SEED(12)) r1 (done[1], rc[1], rf[1], ir[1], ic[1], rs[1]);
  stoch_case_run #(.M(400), .OFFSET_FILE("tb/stoch_case1_offsets.mem"), .SEED(13)) r2 (done[2], rc[2], rf[2], ir[2], ic[2], rs[2]);
  stoch_case_run #(.M(400), .OFFSET_FILE("tb/stoch_case2_offsets.mem"), .SEED(14)) r3 (done[3], rc[3], rf[3], ir[3], ic[3], rs[3]);
  stoch_case_run #(.M(400), .OFFSET_FILE("tb/stoch_case3_offsets.mem"), .SEED(15)) r4 (done[4], rc[4], rf[4], ir[4], ic[4], rs[4]);
  stoch_case_run #(.M(400), .OFFSET_FILE("tb/stoch_case4_offsets.mem"), .SEED(16)) r5 (done[5], rc[5], rf[5], ir[5], ic[5], rs[5]);
  stoch_case_run #(.M(400), .OFFSET_FILE("tb/stoch_case5_offsets.mem"), .SEED(17)) r6 (done[6], rc[6], rf[6], ir[6], ic[6], rs[6]);
  stoch_case_run #(.M(400), .OFFSET_FILE("tb/stoch_case6_offsets.mem"), .SEED(18)) r7 (done[7], rc[7], rf[7], ir[7], ic[7], rs[7]);

  string names [NR] = '{"case 1, 100 FFs", "case 1, 200 FFs", "case 1, 400 FFs",
                        "case 2, 400 FFs", "case 3, 400 FFs", "case 4, 400 FFs",
                        "case 5, 400 FFs", "case 6, 400 FFs"};

  initial begin
    bit all;
    all = 0;
    while (!all) begin
      #1000;
      all = 1;
      for (int i = 0; i < NR; i++) if (!done[i]) all = 0;
    end
    for (int i = 0; i < NR; i++) begin
      $display("%s: checks %0d failures %0d  max|INL| raw %0.2f corrected %0.2f (0.1 ps steps)  resolution %0.4f ps",
               names[i], rc[i], rf[i], ir[i], ic[i], rs[i]);
      checks += rc[i];
      failures += rf[i];
    end
    // doubling the flip-flops roughly halves the step
    checks++;
    if (!(rs[1] < 0.6 * rs[0] && rs[2] < 0.6 * rs[1])) begin
      failures++;
      $display("FAIL resolution does not scale with the flip-flop count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
