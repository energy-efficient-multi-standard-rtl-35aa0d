# MSESC: a multi-standard early stopping criterion for LDPC decoders

An iterative LDPC decoder normally runs a fixed maximum number of iterations
(It_max) on every frame. That is wasted energy in two cases: when the frame
is already corrected, and when it will never be corrected within It_max. This
RTL implements the Multi-Standard Early Stopping Criterion (MSESC) from
"Energy-efficient multi-standard early stopping criterion for LDPC iterative
decoding" (Condo, Baghdadi, Masera). The criterion watches two cheap metrics
at the end of every iteration and tells the decoder when to stop.

The criterion adapts to the code in use without a table of per-code
thresholds. Its three thresholds are computed from the row count M of the
parity check matrix, and from the number of fractional LLR bits, using
shifts only. So one small block serves all 131 WiMAX and WiFi codes.

The blocks here form the stopping-criterion side of a 22-PE
(processing element) layered LDPC decoder. The decoder itself is not
included. Its PEs connect through per-PE edge-stream ports.

## The two metrics

For iteration i:

* **SYN^i**: the number of unsatisfied parity checks. Per check, it is the
  XOR of the hard decisions (sign bits) of the bits in that check.
* **CNMM^i**: the sum over all checks of the smallest check-to-bit
  magnitude |R_lk| in that check. With min-sum decoding, this measures how
  confident the check nodes are.

As a frame converges, SYN falls and CNMM rises. On a frame that cannot be
decoded, CNMM stays low or drops and SYN stays high or rises.

## The stopping rules

Each frame starts with CNT = 0 and IDD (impossible decoding detection) on.
After iteration i (i = 1, 2, ...) the controller applies these rules:

1. SYN^i = 0: stop, the frame is decoded. This is the classic parity-check stop.
2. Otherwise, and only while IDD is on:
   * If i >= 2 and (CNMM^i > T2 or SYN^i < T3), the frame is very likely
     to decode. IDD is switched off for the rest of the frame. From then on,
     the CNMM logic no longer toggles, which is where the energy saving
     comes from.
   * Otherwise, if CNMM fell and SYN rose compared with iteration i-1,
     CNT is incremented.
   * Otherwise CNT is cleared.
   * If CNT = It_ESC: stop, the frame is undecodable.
   * If i >= 0.6 * It_max and SYN^i > T1: stop, the frame converges too
     slowly to finish within It_max.
3. If no rule fired and i = It_max, the iteration budget is used up.

The thresholds are:

| threshold | value         | role                                                    |
|-----------|---------------|---------------------------------------------------------|
| T1        | M >> 6        | SYN limit for the slow-convergence stop (M/64)          |
| T2        | M << bits_f   | CNMM above this means an average min \|R\| above 1.0    |
| T3        | M >> 5        | SYN below this is close enough to switch IDD off (M/32) |

Here bits_f is the number of fractional bits of the LLRs. It is a run-time
input, so the same hardware works for 10-bit LLRs with 3 fractional bits,
7-bit with 1, or 6-bit with 0. The test 0.6 * It_max is computed exactly as
5*i >= 3*It_max, which needs only shifts and adds.

## Computing the metrics on the fly

Reading every bit LLR back after each iteration to compute the syndrome would
cost memory bandwidth. Instead, each PE has a `pe_esc_unit` that watches the
messages the PE produces anyway:

* After a PE updates the bit LLRs of one parity check, the sign bits of the
  new LLRs are XORed. That gives the parity of the check.
* The |R_new| values of the same check go through a running minimum.
* On the last edge of the check, the parity bit is added to a partial
  syndrome counter. If IDD is on, the minimum is added to a partial CNMM.

A PE handles at most ceil(M/P) checks per iteration: 53 for M = 1152 and
P = 22. That sets the counter widths: 6 bits for the partial SYN and 15 bits
for the partial CNMM with 9-bit magnitudes.

In a layered decoder, a bit's LLR can still change in later layers of the
same iteration. The on-the-fly syndrome is therefore built from the LLRs as
they were when each check was processed. It is not a syndrome of the final
hard decisions of the iteration. This is inherent in the on-the-fly method.

At the end of an iteration (`iter_done`), each PE copies its partial values
into holding registers and clears its accumulators. `esc_gather` then adds the
22 partial values one PE per cycle, with a single adder per metric.
`msesc_ctrl` applies the rules to the totals.

## Timing and the decoder handshake

The most delicate part is how the decision overlaps the next iteration.

* Edges arrive one per cycle per PE: `edge_valid`, `edge_sign` (sign of the
  updated bit LLR), `edge_mag` (|R_new|) and `edge_last` (last edge of a
  parity check).
* `iter_done` is a one-cycle pulse once every PE has delivered the last
  edge of the iteration. It may coincide with the last edge.
* `dec_valid` is high in the cycle after the (P+2)-th clock edge following
  the edge that samples `iter_done`. With P = 22 that is 24 cycles.
  `stop`, `reason`, `iter`, `cnt`, `idd_active`, `syn` and `cnmm` are valid
  from then on, and hold until the next decision.
* The decoder does not have to wait. It can start iteration i+1 right after
  `iter_done` and drop it if the decision for iteration i says stop. This
  is how a stop can interrupt an iteration that has already begun.
* The decoder must not pulse `iter_done` again before the previous
  decision has arrived. An assertion in `msesc_top` checks this. A decoder
  iteration takes at least tens of cycles, so this costs no stall in
  practice.
* `code_load` loads M, bits_f and It_max and recomputes the thresholds. This
  happens only when the code changes. `frame_start` begins a new codeword.
  It clears CNT, the iteration counter and all partial sums, and turns IDD
  back on.
* After a stop, `frame_over` stays high and further evaluations are
  ignored until `frame_start`.

`reason` is `msesc_pkg::stop_reason_e`: `STOP_NONE`, `STOP_SUCCESS`,
`STOP_IMPOSSIBLE`, `STOP_SLOW_CONV`, `STOP_MAX_ITER`. `stop` is high for all
reasons except `STOP_NONE`. Once IDD is off, `cnmm` reads 0, because the
CNMM adders are gated.

## Modules

| file                     | role                                                           |
|--------------------------|----------------------------------------------------------------|
| `rtl/msesc_pkg.sv`       | default sizes, `stop_reason_e`, width helper `bits_for`        |
| `rtl/msesc_thresholds.sv`| T1/T2/T3 registers loaded on a code switch                     |
| `rtl/pe_esc_unit.sv`     | per-PE partial SYN and CNMM, on the fly                        |
| `rtl/esc_gather.sv`      | serial sum of the P partial values                             |
| `rtl/msesc_ctrl.sv`      | the stopping rules, CNT, IDD state, iteration counter          |
| `rtl/msesc_top.sv`       | thresholds + P PE units + gather + controller                  |

Top-level parameters (defaults in brackets):

* `P` [22]: number of decoder PEs.
* `M_MAX` [1152]: largest row count. This is the WiMAX N=2304 rate-1/2
  code, the largest among WiMAX and WiFi codes.
* `LLR_W` [10]: LLR width, sign plus 9-bit magnitude.
* `IT_W` [6]: width of the iteration counter and of It_max.
* `IT_ESC` [2]: consecutive bad-trend iterations that count as undecodable.
* `IDD_MIN_IT` [2]: first iteration at which IDD may be switched off.
* `SLOW_AFTER_IDD_OFF` [0]: see below.

All other widths are derived from these.

At the defaults, synthesis without technology mapping gives about 840
word-level cells and 1265 flip-flops. Most of them are the 22 PE units. The
upper 6 bits of `t1` and the upper 5 bits of `t3` are always zero, because
they are M shifted right.

## Interpretation choices

These points are not fixed by the criterion's description. This
implementation settles them as follows:

* **It_ESC** is not given a value. The default is 2. With It_max = 10 this
  stops a hopeless frame at iteration 3 at the earliest, which matches the
  roughly three average iterations reported at low SNR.
* **Slow-convergence test after IDD is off.** As the rules are listed, the
  slow-convergence test sits inside the IDD-active branch. So once IDD is
  off, only the parity check and the It_max limit remain. The accompanying
  discussion says that undecodable frames at high SNR, which switch IDD off
  early, are caught by the slow-convergence test. That is only possible if
  the test also runs after IDD is off. The default follows the listed
  rules. `SLOW_AFTER_IDD_OFF = 1` runs the test (step 2, last bullet) in
  every iteration instead. It costs nothing extra, since SYN is always
  computed.
* **The first iteration.** CNMM^0 is taken as 0 and SYN^0 as its largest
  value. Iteration 1 therefore always clears CNT.
* **Priority.** If CNT reaches It_ESC in the same iteration as the
  slow-convergence test fires, `STOP_IMPOSSIBLE` is reported.
* **Rounding.** The shifts truncate: T1 = floor(M/64), T3 = floor(M/32).
* **Interface.** The serial edge interface, the hold registers that allow
  overlap, the gather order and latency, the registered decision, and the
  asynchronous active-low reset are all this implementation's choices.
* **Counter width.** The partial syndrome counter, described as an adder
  modulo M/P, is made wide enough for ceil(M_MAX/P) checks so that it never
  wraps. The decoder must not map more checks than that onto one PE.

## What is not here

* **The decoder.** The LDPC processing elements (self-corrected min-sum,
  layered) and the Kautz network-on-chip connecting them belong to the host
  decoder. Their edge streams and `iter_done` are ports of `msesc_top`.
  Any min-sum variant can drive them: the criterion only needs the updated
  LLR signs and |R_new|.
* **Baseline criteria.** Other stopping rules (convergence of mean
  magnitude with its per-code threshold memory, and others) are not built.

## Codes

With the defaults, every WiMAX and WiFi code fits, because M <= 1152.
Examples: N=2304 R=1/2 (M=1152), N=1944 R=1/2 (972), N=1944 R=3/4 (486),
N=960 R=2/3 (320), N=1440 R=5/6 (240), N=576 R=5/6 (96), N=2016 R=1/2 (1008),
N=864 R=3/4 (216), and It_max up to 63.

DTMB (M about 3000) and DVB-S2 (M up to 10800 for N=16200 R=1/3) need a
larger `M_MAX`. The counter widths follow automatically.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_msesc_thresholds`: WiMAX/WiFi row counts and random M and bits_f,
  including clamping and holding the values between loads.
* `tb_pe_esc_unit`: random check degrees, signs, magnitudes and idle
  cycles; CNMM path off in some iterations; `iter_done` sometimes on the
  last edge.
* `tb_esc_gather`: the sums, the P+1 cycle latency, CNMM gating, and a
  restart while busy.
* `tb_msesc_ctrl`: two controllers, one per `SLOW_AFTER_IDD_OFF` setting,
  checked against a reference model of the rules over 3000 frames. Every
  stop reason, the IDD switch-off, and CNT increments and clears are
  required to occur.
* `tb_msesc_top`: the whole design at default parameters. A behavioural
  stream generator stands in for the 22 PEs. It runs 9 codes with 6 frame
  trajectories each:
  * converging, with IDD switched off early;
  * converging, with IDD kept on;
  * undecodable;
  * undecodable with a broken trend;
  * slowly converging;
  * undecodable but with high CNMM, which runs to It_max.

  The testbench checks SYN, CNMM, every decision and the decision latency
  against values computed from the generated data. It also requires that
  stops interrupt a running iteration. It runs in well under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/msesc_pkg.sv tb/tb_msesc_top.sv --top-module tb_msesc_top -o sim
./obj_dir/sim
```

Replace `tb_msesc_top` with any other testbench name. All sources pass
`verilator --lint-only -Wall`; the only warnings are about unused package
constants and the reset used both by the flops and by the assertion's
`disable iff`.
