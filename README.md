# Time-to-digital converters from number theory and stochastic sampling

A time-to-digital converter (TDC) turns the interval between a START and a
STOP edge into a number. The plain way to do that is a delay line with one
flip-flop per delay stage, which for 2^13 levels costs 8192 stages and 8192
flip-flops. The designs here get the same count from much less hardware by
using arithmetic:

* **Residue number system (RNS) TDC.** A ring oscillator of m stages comes
  back to the same state every 2m stage delays, so its state is the elapsed
  time *modulo m*. Several short rings with coprime lengths give a set of
  residues, and the Chinese remainder theorem turns them back into the
  interval. Rings of 2, 3 and 5 stages give 30 levels from 10 delay cells.
* **Gray code TDC.** One stage output of a ring changes per stage delay,
  just like one bit of a reflected Gray code. Rings of 2, 4, 8, ... stages
  tapped at the right outputs produce the Gray code of the elapsed time
  directly, and only one captured bit changes per step, so stage mismatch up to
  one stage delay cannot produce an out-of-order code.
* **Gray code TDC with a cyclic code.** The two fastest Gray bits are made
  by an 8-bit circular shift register instead of the shortest rings, so no
  node toggles faster than the second Gray bit.
* **Stochastic TDC with self-calibration.** 400 flip-flops all sample the
  same edge; process variation spreads their sampling instants by a few
  picoseconds, so the number that saw the edge resolves well below one gate
  delay, but with random step widths. A histogram taken against a
  free-running ring oscillator measures every step width, and a table built
  from the cumulative histogram straightens the transfer curve.

All four are in `rtl/`, side by side under one top, `tdc_top`.

## Ring oscillators as time counters

`ring_osc` is the common building block: S delay stages in a loop closed by
an inverter. In this RTL each delay stage is a flip-flop clocked by `dclk`,
so one `dclk` period is the stage delay τ (this is also how an FPGA
prototype of such a converter is built; in silicon the stages would be
buffers). While `start` is low every stage holds `init_val` (the Initial
Value); from the first `dclk` edge with `start` high the ring runs, one
stage changing per τ. From all zeros an S-stage ring walks

    000..0, 100..0, 110..0, ..., 111..1, 011..1, 001..1, ..., 000..1

and repeats after 2S steps. STOP captures some or all of the stage outputs
in flip-flops (`always_ff @(posedge stop)`); decoding the captured word is
what differs between the converters.

The captured bits are XORed with `init_val`, so a run started from Initial
Value 1 (all stages high) reads the same as one started from 0. In all three
ring-based converters the result counts the `dclk` edges at which `start`
was high before the STOP edge, modulo the range.

## Residue number system TDC (`rns_tdc`)

Three rings of M1 = 2, M2 = 3 and M3 = 5 stages start together. On STOP all
10 stage outputs are captured and each ring's word goes through a
`residue_encoder`:

* if the last stage is 0 the ring is in its filling half, and the residue is
  the number of ones;
* otherwise it is in its emptying half, and the residue is M minus the
  number of ones.

This gives a_k = x mod M_k, for example a2 in {0,1,2} on 2 bits and a3 in
{0..4} on 3 bits. `crt_decoder` then reconstructs

    x = (a1·w1 + a2·w2 + a3·w3) mod 30,   w_k = (30/M_k) · ((30/M_k)^-1 mod M_k)

which for 2, 3, 5 gives weights 15, 10 and 6. The weights are computed at
elaboration time by `tdc_pkg::crt_weight`, so any three pairwise coprime
moduli work (for example 5, 7, 9 for 315 levels). The residues are brought
out too (`a1`, `a2`, `a3`).

The weak point of this scheme is mismatch. When x steps from d to d+1, every
residue changes at once. With unequal stage delays they change at slightly
different moments, and the reconstructed x can jump far out of sequence for
a short window. The skew grows with time, so these windows widen as the
interval grows.

The RTL stages are ideal flip-flops, so the RTL itself cannot show this.
`tb/ring_mismatch_tb.sv` shows it with continuous-time buffer rings
(`tb/ring_delay_model.sv`) feeding the RTL encoders and decoder:

* With all buffers at 20 ns, x follows the interval exactly.
* With the 2-stage ring at 20.5 ns, 94 of 1000 steps over 1 µs are out of
  sequence.

## Gray code TDC (`gray_tdc`)

For an N-bit code:

* Gray bit G(k), for k < N−1, is stage output R(2^k − 1) of a ring of
  2^(k+1) stages.
* The two top bits share the last ring, of 2^(N−1) stages. G(N−2) is taken
  from tap R(2^(N−2) − 1) and G(N−1) from tap R(2^(N−1) − 1).

For the default N = 4 this is rings of 2, 4 and 8 stages. That makes 14
delay cells, 4 capture flip-flops and a longest ring of 8 stages, for 16
levels. In general the cost is 2^N − 2 cells but only N flip-flops.

Only the N tap outputs are captured, so the other ring stages are read by
nothing outside the ring. `gray_decoder` converts to binary:
B(N−1) = G(N−1), then B(k) = B(k+1) xor G(k).

Only one tap changes per τ. If a stage is late or early, a code edge moves a
little, but the captured word is always a neighbour of the true one. This
robustness against mismatch is the reason to prefer this converter over the
RNS one.

There is a limit to this robustness. Each edge of a higher bit sits in the
middle of a pulse of G0, and a G0 pulse is two stages wide. So the skew
between rings may grow to one stage delay before an edge crosses its
neighbour and the order of codes breaks. In `ring_mismatch_tb` the 2-stage
ring runs at 20.5 ns against 20 ns. The code stays in sequence up to 20 ns
of accumulated skew, which is reached at about 800 ns, and breaks beyond
it.

## Gray code TDC with a cyclic code (`gray_cyclic_tdc`, `cyclic_code_gen`)

G0 toggles every τ, which is the fastest node in the Gray converter. An
8-bit cyclic code avoids that node:

* Eight flip-flops C0..C7 in a loop (C0 takes C7, C(i) takes C(i−1)) are
  loaded with 00001111 (C0..C3 = Initial Value, C4..C7 = its complement).
* The register then rotates one place per τ. Across its 8 states, C1 equals
  G1 and C0 xor C2 equals G0.
* Every C bit toggles only every 4τ, but the XOR is formed after capture.

The default N = 6 converter takes:

* G0 and G1 from the generator;
* G2 from an 8-stage ring;
* G3 from a 16-stage ring;
* G4 and G5 from one 32-stage ring.

On STOP all six bits are captured together and decoded with
`gray_decoder` at N = 6.

The generator must advance once per ring stage delay, or the two low bits
would not match the upper ones. This RTL clocks it from the same `dclk` as
the rings. An FPGA set-up that clocks the generator at twice the ring stage
rate would not produce a Gray sequence. Initial Value 1 inverts every
generator bit, which leaves G0 unchanged; the capture XOR is applied only
to G1 and the ring taps.

## Stochastic TDC and histogram calibration (`stoch_tdc`)

### Front end (not RTL)

A delay line drives M = 400 flip-flops, arranged as 8 columns × 50 rows,
all clocked by STOP. Each flip-flop has its own effective sampling offset
o_i, around 20 ps with a spread of a few ps. A multiplexer (`sel`) chooses
what drives the line:

* `sel` = 0 (measurement): the line is driven by START;
* `sel` = 1 (calibration): the line is driven by its own inverted output
  through two dummy buffers, so it runs as a ring oscillator with no
  relation to STOP.

This part is analog and device-specific, so it is not synthesizable.
`tdc_top` brings its signals out as ports: `sto_q`, `sto_phase` (the line
level captured by STOP) and `sto_sel`. The testbenches use the behavioural
model `tb/stoch_frontend_model.sv`, which works as follows:

* Flip-flop i reads the new line level if the last line edge came at least
  o_i before STOP.
* The ring half period is 40 ps, two buffer delays of 20 ps. It must exceed
  the largest offset.
* The offsets of six delay-variation cases are in
  `tb/stoch_case{1..6}_offsets.mem` as hex femtoseconds, column by column:

  | Case | Offset spread |
  |---|---|
  | 1, 2, 3 | N(20 ps, σ≈6 ps) |
  | 4 | N(20 ps, σ≈1 ps) |
  | 5 | N(20 ps, σ≈2 ps) |
  | 6 | N(20 ps, σ≈3 ps) |

### Back end (RTL)

The back end is clocked by `clk`; the tests use 1 GHz. A sample passes
through these stages:

1. **STOP synchroniser.** STOP goes through two flip-flops. On its rising
   edge the back end takes `q` and `phase`, which the front end holds until
   the next STOP.
2. **`ones_counter`.** It counts the ones in `q`. Calibration STOPs also
   land after *falling* line edges, and the flip-flops that saw such an edge
   read 0. So when the captured `phase` is 0, the zeros are counted instead.
   Both half-waves then measure "time since the last edge" the same way.
   This gives `raw_code` in 0..400, with `raw_valid` 4 `clk` cycles after
   STOP.
3. **`histogram_engine`.** In calibration, each raw code increments its bin.
   There are 401 bins of 17 bits each, and they saturate.
4. **`error_correction`.** After calibration it builds a table of

       Dout(N) = FS · Σ_{i=1..N} Pin(i) / Σ_{i=1..FS} Pin(i),   FS = 400

   The table holds the normalised cumulative histogram, in fixed point with
   8 fraction bits, rounded down. Because calibration samples land at
   uniformly random times, Pin(i) is proportional to the width of code i.
   Dout(N) is then the true position of code N's upper edge on a 0..FS
   scale. The sums run from 1, because code 0 is the "nothing seen yet"
   code. The table is filled one entry at a time with a restoring divider
   (`seq_divider`, one quotient bit per cycle). A build takes about
   401 × 46 ≈ 18 500 cycles. In measurement, each raw code is looked up and
   `corr_code` comes one cycle after `raw_code`.
5. **`stoch_ctrl`.** This is the mode sequencer:
   * IDLE: raw codes pass uncorrected.
   * `cal_req` goes to CALIB. The histogram is cleared, `sel` = 1, and
     `CAL_SAMPLES` = 65 536 samples are counted.
   * BUILD: the table is computed.
   * MEASURE: `calibrated` = 1 and samples are corrected.
   * Another `cal_req` recalibrates at any time.

Timing rules for STOP:

* STOP must stay high and low for at least two `clk` periods each.
* Samples must be at least four `clk` periods apart.

### How well it works

The table below comes from simulating the RTL with the behavioural front
end (`tb/stoch_cases_tb.sv`). Each run calibrates with 16 384 samples and
then sweeps the interval from 0 to 42 ps in 0.1 ps steps. The INL is the
worst distance from the least-squares line over the points inside the
measurement range, in 0.1 ps steps. The resolution is the offset spread
divided by the number of flip-flops.

| Offsets | Flip-flops | Worst INL raw → corrected | Resolution |
|---|---|---|---|
| case 1 | 100 | 5.3 ps → 2.8 ps | 0.341 ps |
| case 1 | 200 | 4.7 ps → 2.0 ps | 0.170 ps |
| case 1 | 400 | 4.8 ps → 2.1 ps | 0.092 ps |
| case 2 | 400 | 5.5 ps → 2.2 ps | 0.089 ps |
| case 3 | 400 | 4.3 ps → 1.2 ps | 0.085 ps |
| case 4 | 400 | 0.5 ps → 0.5 ps | 0.013 ps |
| case 5 | 400 | 1.5 ps → 0.6 ps | 0.030 ps |
| case 6 | 400 | 2.3 ps → 1.4 ps | 0.043 ps |

Correction always lowers the INL. What remains is sampling noise in a
histogram of 16 384 samples spread over 400 bins. Calibrating longer, as
the default 65 536 samples do, shrinks it further. Doubling the flip-flops
halves the step, as expected.

## Top level (`tdc_top`)

The four converters share only their clocks:

* `dclk`: period τ, for the three ring-based converters;
* `clk`: for the stochastic back end, with `rst_n` as its asynchronous
  active-low reset.

Each converter has its own ports:

| Prefix | Inputs | Outputs |
|---|---|---|
| `rns_` | `start`, `init`, `stop` | `a1`, `a2`, `a3`, `x` (0..29) |
| `gray_` | `start`, `init`, `stop` | `g`, `b` (4 bits) |
| `gcyc_` | `start`, `init`, `stop` | `g`, `b` (6 bits) |
| `sto_` | `stop`, `q[399:0]`, `phase`, `cal_req` | `sel`, `mode`, `raw_code`, `raw_valid`, `corr_code[16:0]` (8 fraction bits), `corr_valid`, `calibrated`, `hist_samples` |

`tdc_top` has no parameters. The sub-modules are parameterised:

| Module | Parameters |
|---|---|
| `rns_tdc` | M1, M2, M3 |
| `gray_tdc` | N |
| `gray_cyclic_tdc` | N |
| `stoch_tdc` | M, CW (histogram counter width), FRAC, CAL_SAMPLES |

## Design choices beyond the original description

* Delay stages are flip-flops on `dclk`. Mismatched stage delays exist
  only in the behavioural rings of `ring_mismatch_tb`.
* START is not synchronised: the rings begin on the first `dclk` edge that
  sees it high.
* Captured ring bits are XORed with the Initial Value, so both values give
  the same code.
* Residue encoding (count of ones or zeros) and CRT reconstruction are done
  in hardware.
* The cyclic generator shifts once per τ on the same clock as the rings.
* Stochastic back end:
  * the phase-dependent ones/zeros count;
  * the two-flip-flop STOP synchroniser;
  * the fixed calibration length of 65 536 samples;
  * 17-bit saturating bins;
  * the 8-fraction-bit, round-down correction table;
  * identity correction when the histogram is empty;
  * the IDLE/CALIB/BUILD/MEASURE sequencer.
* In calibration, STOP is an external input unrelated to the ring. It is
  not a second ring oscillator.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Run from the repository root, because
the offset files are read as `tb/...`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/tdc_pkg.sv tb/tdc_top_tb.sv --top-module tdc_top_tb
    ./obj_dir/Vtdc_top_tb

Replace `tdc_top_tb` with any other testbench:

| Testbench | What it covers |
|---|---|
| `tdc_top_tb` | Whole design at default sizes, run end to end. It covers wrap-around of all three ring converters, both Initial Values, falling-half-wave samples, two calibrations, a recalibration and measurement with INL checks. It takes about 10 s. |
| `stoch_cases_tb` | All delay-variation cases and the 100/200/400 flip-flop arrays (table above). |
| `stoch_tdc_tb` | Stochastic back end alone. |
| `ring_osc_tb`, `residue_encoder_tb`, `crt_decoder_tb`, `rns_tdc_tb` | RNS converter parts. |
| `gray_decoder_tb`, `gray_tdc_tb` | Gray converter; `gray_tdc_tb` runs N = 4, 6 and 8. |
| `ring_mismatch_tb` | RNS and Gray decoding with mismatched buffer delays (behavioural rings). |
| `cyclic_code_gen_tb`, `gray_cyclic_tdc_tb` | Cyclic-code converter. |
| `gray_13bit_tb` | Both Gray converters at 13 bits (8192 levels, about 8190 ring stages each). |
| `ones_counter_tb`, `histogram_engine_tb`, `seq_divider_tb`, `error_correction_tb`, `stoch_ctrl_tb` | Stochastic back-end parts. |

Every RTL file starts with a comment giving its operation, interface and
timing.
