# TDC PUF: a physical unclonable function built from a self-calibrating flash TDC

A flash time-to-digital converter (TDC) measures time with a chain of delay
elements. Process variation makes those elements slightly unequal. That
inequality is normally a defect, corrected by linearity calibration. Here it is
the secret. The calibration hardware already measures how long each delay
element takes, relative to the whole chain. This design turns that measurement
into a challenge-response PUF:

* The delay elements are 2-to-1 multiplexers. Both inputs of each one are fed
  from the previous stage, and a challenge bit picks which of the two
  (nominally equal) paths an edge takes. The delay of every stage therefore
  depends on the challenge and on the chip.
* A histogram calibration samples the line at random moments. The number of
  samples that land in one bin is proportional to the delay of that bin's
  stage.
* A response bit compares two such bin lengths, measured under two different
  sub-challenges.

The digital part is small. It has one flip-flop per stage, an encoder, an 8-to-1
multiplexer, a 16-bit counter, a tiny coefficient table and a controller. The
analog part (delay line and oscillators) is ordinary logic on an FPGA or in a
standard-cell flow. In this repository it is given as behavioural timing
models, so that the whole PUF can be simulated.

## Structure

```
             CI[7:0]                              CI[10:8]
               |                                     |
 START --+  +--v------------------------------+      v
         |  | MUX0 -> MUX1 -> ... -> MUX7     |   bin_select_mux --> bin_counter --> COUNT
 mode  [MUX]| (puf_delay_line, 8 x            |      ^                (16 bit)         |
  MUX    ^  |  puf_mux_stage)                 |      |                                 v
         |  +--taps[0..7]----------+----------+   tdc_encoder                   puf_controller
         |                         |     |           ^                         (C0, C1, R)
         +--- inverter/wire <------+-----+           |                                 ^
              (start_ring_closure)  line_out   tdc_sampler (8 DFF) <-- smp_clk    coef_table
                                                                  ^
                                                        stop_ring_osc (2nd ring, or STOP)
```

| Module | Kind | Role |
|---|---|---|
| `tdc_puf` | top | The whole PUF, one device |
| `puf_controller` | RTL | Runs the two calibrations and the comparison |
| `coef_table` | RTL | Compensation coefficients COEF[i] |
| `bin_counter` | RTL | 16-bit saturating counter for the bin length |
| `bin_select_mux` | RTL | 8-to-1 multiplexer, CI[10:8] picks the bin |
| `tdc_encoder` | RTL | Sampled taps → bin number (one-hot and binary) |
| `tdc_sampler` | RTL | Flip-flop bank clocked by the sampling clock |
| `puf_delay_line` | behavioural | 8 multiplexer stages with per-device path delays |
| `puf_mux_stage` | behavioural | One stage: two delayed fan-out paths and a 2:1 MUX |
| `start_ring_closure` | behavioural | Inverter, feedback wire and mode MUX at the line input |
| `stop_ring_osc` | behavioural | Second ring oscillator (sampling clock), or external STOP |
| `tdc_puf_pkg` | package | Constants, controller state type, device-variation model |

## How a response is computed

With 2^n stages a sub-challenge `CI` is 2^n + n bits. For the 8-stage default
that is 11 bits: `CI[7:0]` steer the multiplexers and `CI[10:8]` name the bin
to count. A challenge is two sub-challenges, `C = {C0, C1}`, 22 bits.
`challenge[21:11]` is C0, applied first.

1. Apply C0 and run a calibration. The line is closed into a ring oscillator,
   and 2^17 samples are taken. The counter ends up holding COUNT0, the number
   of samples whose TDC result equalled `C0[10:8]`.
2. Apply C1 and run a second calibration. This gives COUNT1.
3. `R = 0` if `COEF[bin0] * COUNT0 > COEF[bin1] * COUNT1`, otherwise `R = 1`.

Every coefficient resets to 1, which gives the plain comparison
COUNT0 > COUNT1. Coefficients exist to cancel a *systematic* difference
between stages, for example a slow routing hop that makes one stage always
longer. A stage that is systematically long would make responses biased. The
host writes the coefficients through `coef_we/coef_addr/coef_wdata`.

A count is proportional to `d_k(CI[k]) / lap(CI)`. Here `d_k` is the delay of
the selected stage on its selected path, and `lap` is the time for one trip
around the ring. The lap time also depends on all the other challenge bits, so
every bit of both sub-challenges affects the response.

### The bins, and why the last one is special

Flip-flop *i* samples the **input** of stage *i*. In the ring, one edge travels
round and flips polarity on every lap (the feedback inverts it). The encoder
therefore compares every tap with tap 0 rather than looking for ones:

* If taps 0..k agree and tap k+1 differs, the edge was inside stage k, and the
  result is k (for k = 0..6).
* If all taps agree, the edge was inside stage 7 or in the return path
  (inverter, feedback wire, mode MUX). The result is 7.

So bins 0–6 each measure one multiplexer stage. Bin 7 also contains the return
path, which has nothing to do with the challenge. That bin should not be used
for responses. The controller still evaluates such a challenge, but it raises
`reserved` alongside `done`, and the host should discard that bit.
`coef_table` has no entry for bin 7: writes to it are ignored and reads return 1.

### Why the samples are random

The sampling clock comes from a second, free-running ring oscillator. Its
period bears no fixed relation to the delay-line ring. Each sample therefore
catches the travelling edge at an effectively random point of its lap, and
with enough samples the histogram follows the delay profile. In the model the
sampling ring has a period of 3.236 ns against a delay-line ring period of
about 1.9 ns. It also has ±100 ps of uniform jitter per half period. The
jitter accumulates from cycle to cycle, so the sampling phase drifts randomly
and does not lock onto a few fixed points. This matters whenever the two
periods happen to be close to a simple ratio (3.236/1.9 is close to 17/10).
The jitter also makes repeated measurements of one device differ, as real
noise does. It is the source of intra-chip variation in simulation.

## Controller sequence and timing

All digital logic, including the host side, is clocked by the sampling clock.
That clock is brought out as `smp_clk`. `rst_n`, `req`, `challenge` and the
coefficient port must be driven synchronously to it.

For each sub-challenge the controller goes through three phases:

* **SETUP**: lasts `SETTLE_CYCLES` (4) cycles. The ring is stopped (the mode
  MUX passes START, which is low), CI takes the new value and the counter is
  cleared. Stopping the ring matters. Changing a multiplexer select while an
  edge is passing through can cut a glitch into the ring, and a ring carrying
  three edges would give wrong histograms from then on. An assertion checks
  that CI never changes while the ring runs.
* **CAL**: lasts `WARMUP_CYCLES` (2) + 2^17 cycles. The ring runs. The first
  two samples are not counted, then exactly 2^17 are.
* **LATCH0** (after the first calibration only) stores COUNT0. **DECIDE**
  (after the second) compares the two products and pulses `done`.

Latency from the `req` cycle to `done` is
`2*(SETTLE_CYCLES + WARMUP_CYCLES + 2^SAMPLES_LOG2 + 1) + 1` cycles. That is
262 159 cycles at the defaults, about 0.85 ms with the modelled 3.24 ns
sampling clock. `req` is ignored while `busy`. `resp`, `count0`, `count1` and
`reserved` hold their values until the next request.

The counter saturates at 2^16−1 rather than wrapping, and `cnt_sat` reports
this. With 2^17 samples, a stage bin normally holds around 14 k samples and
bin 7 around 35 k, so saturation should not occur at the default size.

### Normal mode

With `normal_mode = 1` the structure is a plain flash TDC again. START drives
the line and the external STOP clocks the flip-flops. `tdc_code`, one cycle
after STOP, gives the number of stages the START edge had passed (7 when it
had passed them all or had not yet entered). The PUF does not use this mode.
Because the digital logic is then clocked by STOP, no response may be
requested in normal mode.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_LOG2` | 3 | 2^N_LOG2 stages; sub-challenge 2^N_LOG2 + N_LOG2 bits |
| `CNT_W` | 16 | Bin counter width |
| `SAMPLES_LOG2` | 17 | log2 of samples per calibration |
| `COEF_W` | 8 | Coefficient width (unsigned integer) |
| `DEVICE_SEED` | 1 | Which simulated chip: selects the delay variation and the jitter sequence |

The stage count, counter width, sample count and challenge width are those of
the reference configuration. Everything in the `assumed` rows of this section
and the next one is this design's own choice.

## Behavioural models and the variation model

`puf_mux_stage`, `puf_delay_line`, `start_ring_closure` and `stop_ring_osc`
use `#` delays. They simulate with `verilator --timing` and are accepted by
lint and by elaboration front ends, but synthesis ignores their timing. On an
FPGA the stages are LUT multiplexers with placement constraints, the closure is
an inverter and a MUX, and the sampling oscillator is a separate ring. Those
need hand placement, which is outside what RTL can express.

Delays come from `tdc_puf_pkg::stage_delay_ps(seed, stage, path)`: each path
is 100 ps × (1 + 0.08·v), where v is a fixed pseudo-random number with zero mean
and unit variance. The return path is 150 ps with the same spread. These
numbers are assumptions chosen to look like an FPGA, not measurements. The
testbenches use the same functions to predict bin lengths.

## Departures and own choices

* **Bit order of the challenge.** C0 ("the former" sub-challenge) is taken as
  the upper 11 bits.
* **8-to-1 multiplexer inputs.** The multiplexer selects among per-bin hit
  signals decoded from the flip-flops, not raw flip-flop outputs. A single
  flip-flop cannot tell whether the result *equals* the selected bin, and that
  equality is the counting rule.
* **Tap placement.** Flip-flops sample stage inputs, which makes bin *i* the
  delay of stage *i* and puts the return path into the last bin.
* **Ring stop between calibrations, warm-up samples, saturating counter,
  handshake, single clock domain, coefficient width and reset value:** all
  are this design's own choices.
* **Only one device per top.** The reference evaluation placed 15 PUFs and a
  soft processor on one FPGA. Here the top is a single PUF; a multi-device
  system instantiates `tdc_puf` several times. The processor, which generated
  challenges with an 11-bit LFSR in software, is not included. The
  testbenches generate the same kind of challenges themselves.
* **No metastability synchronizer** after the sampling flip-flops.
* **No full histogram engine.** A self-calibrating TDC normally keeps a
  counter for every bin and uses the histogram to correct its normal-mode
  results. The PUF needs only one bin length at a time, so it has a single
  counter behind a bin multiplexer. Normal-mode codes are not linearity
  corrected.

## Verification

Every module has a self-checking testbench in `tb/`, named after the module
with a `tb_` prefix. Each ends with `TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|---|---|
| `tb_tdc_encoder` | All 256 sampled patterns against an independent scan |
| `tb_bin_counter` | Random clear/enable/hit traffic; saturation of a 4-bit instance |
| `tb_puf_controller` | Phase lengths, CI per calibration, COUNT0/1, R with and without coefficients, reserved flag, latency, busy behaviour |
| `tb_puf_delay_line` | Edge arrival at every tap equals the sum of the selected path delays |
| `tb_start_ring_closure`, `tb_stop_ring_osc`, `tb_puf_mux_stage`, `tb_tdc_sampler`, `tb_bin_select_mux`, `tb_coef_table` | Their blocks in isolation |
| `tb_tdc_puf` | End to end at 2^12 samples, 24 LFSR challenges. Checks each count against the bin length predicted from the device delays, R, reserved, latency, a coefficient reversing a response, saturation of an 8-bit counter and normal-mode measurements. Counts how often each mechanism happened |
| `tb_tdc_puf_full` | One full-size evaluation (all defaults, 2^17 samples, about 10 s of simulation). Counts agree with prediction within about 1 % |
| `tb_puf_variation` | 3 devices × 16 challenges × 2 queries at 2^13 samples. Reports intra- and inter-chip variation and requires intra < inter |

The variation run gives 20–30 % intra-chip and about 60 % inter-chip
variation. The exact figures depend on the start-up phase of the sampling
oscillator, which follows the random power-up state. It uses 2^13 samples,
where count noise is 4× larger relative to the bin lengths than at 2^17 (the
relative noise scales as 2^(−S/2)). So its
intra-chip figure is well above what the full-size calibration gives. The
reference hardware reported 8.5 % intra-chip and 42.5 % inter-chip variation
over 15 devices, 128 challenges and 128 queries. That run was not repeated
here. At 0.85 ms of device time per response bit, it is far beyond what an
event-driven simulation of the delay line can cover.

How far to trust it: the digital blocks are checked exhaustively or against
independent models. The PUF behaviour — counts proportional to stage delay,
distinct responses per device — is checked only against the behavioural delay
model, whose spread and noise are assumptions.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/tdc_puf_pkg.sv tb/tb_tdc_puf.sv -y rtl --top-module tb_tdc_puf -o sim
./obj_dir/sim
```

Replace `tb_tdc_puf` with any other testbench name. `tb_puf_variation` takes
about 2 minutes; the others take seconds. To shorten or lengthen a
calibration, override `SAMPLES_LOG2` on `tdc_puf`. To simulate another chip,
override `DEVICE_SEED`.
