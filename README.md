# Asynchronous eye diagram reconstruction for high speed links

An eye diagram of a multi-gigabit link normally needs a sampling scope with
a clock recovered from the data. This design gets one on chip from a slow,
free-running ADC instead. A sampling clock of about 200 MHz, not locked to
the data, undersamples the link waveform. Sample `n` then lands at bit phase

    tau_n = mod(n * lambda, 1),   lambda = mod(f_data, f_sample) / f_sample

Once lambda is known, plotting every sample at its phase `tau_n` rebuilds
the eye, with no clock recovery and no DSP: one addition per sample. The
whole difficulty is knowing lambda well enough. Over 3072 samples, an error
of 1/3072 of a period per sample already smears the eye over a full period.
The RTL here finds lambda in three steps:

1. **Count**: a counter pair estimates lambda to 10 bits.
2. **Search**: a coarse search tries lambda values until the eye opens.
3. **Correct**: a fine correction measures how fast the eye drifts between
   two groups of samples and removes that drift. It runs twice, first at
   low and then at high resolution.

At the end, the tau memory holds the phase of each of the 3072 stored
samples. The pairs (tau, y) can be read out and plotted.

The numbers below are those of the reference system:
- 10 Gb/s or 1 Gb/s data;
- 201.67 MHz sampling clock;
- 75 MHz system clock;
- 8-bit ADC;
- 3072 samples.

## Signal flow

```
 data_in ──► subrate_extractor ──data_sub──► lambda_estimator ──10-bit estimate──┐
 samp_clk ─►  (÷128 each)     ──samp_sub──►                                      │
                                                                                 ▼
 adc_data ─► mem_ctrl ◄── tau_calc ◄────────── main_fsm ──► coarse_search ──► fine_correct (×2)
            (sample + tau         ▲               │              │                 │
             stores, host port)   └── eye_finder ◄┴──────────────┴─────────────────┘
```

`eye_recon_top` wires these together:

| module | job |
|---|---|
| `freq_divider` | ripple chain of divide-by-2 flip-flops |
| `subrate_extractor` | two dividers: 5 stages on the data, 7 on the sampling clock |
| `lambda_estimator` | two 10-bit counters and the clock domain crossing of their result |
| `reg_ram` | 3072 x 8 register array, separate write and read clocks |
| `mem_ctrl` | sample store (written on `samp_clk`), tau store, burst reader, host read port |
| `tau_calc` | 18-bit phase accumulator; writes 3072 tau values |
| `eye_finder` | bins a sample group by tau; returns eye opening, its reliability and its location |
| `coarse_search` | alternating trial-and-error search for an open eye |
| `fine_correct` | drift measurement and correction, with the wrap-around retry |
| `main_fsm` | run sequence; shares `tau_calc` and `eye_finder` between the two correction modules |
| `eyerec_pkg` | widths, sizes, the `eye_result_t` struct, the open-eye test |

The analog parts of the system are not RTL and are not here:
- the 10 GHz sample and hold;
- the ADC;
- the sampling clock source;
- the current-mode front divider of the data path.

The top takes `data_in` as the data's digital level, `adc_data` as the ADC
code and `samp_clk` as the sampling clock. It drives `sh_enable` to the
sample and hold.

## Lambda from two counters

A divider by 2^k keeps the ratio of two frequencies, so the two subrates
run near 1.6 MHz and their ratio is still f_data / f_sample. The data
chain has two stages fewer than the clock chain (5 against 7). Random NRZ
data has a rising edge on only one bit in four, and that already divides
by 4.

The sampling-subrate counter counts 2^10 edges and then stops with a
sticky overflow. Meanwhile the 10-bit data counter has wrapped about 50
times (at 10 Gb/s). What is left in it is `mod(N_data, 1024)`. Read as a
10-bit fraction, that is lambda.

The overflow crosses three clock domains:
1. It is retimed on the falling edge of the data subrate. That is half a
   subrate period after the data counter last moved, so the latched count
   has settled.
2. The retimed overflow latches the data count.
3. The retimed overflow then passes a two-flop synchroniser into the
   system clock. The system-clock side copies the long-stable latched count
   and raises `done`.

The estimate takes 2^10 × 2^7 / 201.67 MHz ≈ 650 µs.

**Know the limit of the estimate.** The 1024 sampling-subrate edges span
only 1023 to 1024 subrate periods. This depends on where the first edge
falls after `enable`. So the data count can come up short by as much as
f_data / f_sample counts: about 50 at 10 Gb/s, about 5 at 1 Gb/s. That is
up to 0.05 of lambda, not the one LSB a naive reading suggests. The coarse
search covers ±0.125 around the estimate, so this is absorbed. But a
design that skipped the coarse search would need a longer or gated window.
The testbench checks the estimate against this bound.

## Reconstruction: tau calculator and memories

`tau_calc` adds lambda (an 18-bit fraction of a period) to an accumulator
once per system clock. It writes the top 8 bits as tau for samples 0 to
3071, starting from tau_0 = 0. It takes 3073 cycles from start to done.

`mem_ctrl` holds two 3072 × 8 stores:
- **Sample store**: written in the `samp_clk` domain during the capture.
  The capture request and its completion cross by two-flop handshakes.
- **Tau store**: written by `tau_calc` on `sys_clk`.

A burst reader streams (tau, y) pairs from a first to a last address to the
eye finder. The first pair is valid two cycles after `rd_start`, then one
pair per cycle follows, and `rd_end` flags the last. A host port
(`host_addr` → `host_tau`, `host_y`, one cycle latency) reads the result
when the run is over.

## The eye finder

This block decides everything downstream, so its definition matters:

1. **Binning.** Each pair is put in one of M bins by the top log2 M bits of
   tau: M = 32 at low resolution, 64 at high resolution. The other tau bits
   are never used.
2. **Per-bin extremes.** Each bin keeps the largest y below mid-scale (128)
   and the smallest y at or above it. The bin's opening is their
   difference. A bin with no sample on one side has opening 0.
3. **Filtering.** The M openings form a ring. An 8-tap running average
   smooths the ring, computed push-and-pop: preload the sum with 8 bins,
   then per cycle add the next bin and subtract the oldest. Each output is
   the window sum / 8, truncated, and is assigned to the window's centre
   bin.
4. **Result.** The block returns an `eye_result_t`:
   - `range`: filtered maximum − filtered minimum;
   - `deviation`: unfiltered maximum − filtered maximum;
   - `location`: the centre bin of the first filtered maximum, in 1/256 of
     a period.
5. **Timing.** `done` comes 9 + M cycles after the last pair: 8 preload
   cycles, M filter cycles and one result register.

An eye counts as open when range ≥ 32 and deviation ≤ 16 (`eye_is_open`
in the package).

The deviation test rejects a wrong lambda that happens to show a narrow,
tall opening. Filtering flattens a narrow spike but leaves a real, broad
eye almost unchanged. It also means a very sharp-topped eye can fail the
test even at the right lambda. With the default 8 taps, a window spans a
quarter of the period at 32 bins. Real band-limited eyes are round-topped
and pass.

Ties go to the first maximum. If an eye had an exactly flat top, its
reported location would be the start of the plateau plus half a window,
not the plateau's centre. Both fine-correction groups see the same bias, so
it largely cancels in the drift.

## Coarse search

`coarse_search` starts from the estimate, placed in the top 10 bits of the
18-bit lambda. It loops RECONSTRUCT (run `tau_calc`) → FIND_EYE (eye over
samples 0..1023, 32 bins). If the eye is closed, it tries the next value,
alternating right and left of the estimate in steps of 2^-11. Two
registers hold the current right and left values.

A correct lambda k steps away is reached after:
- 2k trials for k > 0;
- 2|k| + 1 trials for k < 0.

After MAX_TRIAL = 512 trials (±0.125) it gives up and flags `fail`. Each
trial costs about 4150 system cycles: 3073 for the tau pass, 1024 for the
eye pass, plus the filter.

## Fine correction and the wrap-around retry

With a residual error e, the eye of group 2 (starting 1024 samples later)
appears shifted by −1024·e relative to group 1. `fine_correct` runs these
steps:

1. **FIND_EYE1, FIND_EYE2.** Measure the eye locations c1 of group 1 and
   c2 of group 2.
2. **RECONSTRUCT.** Compute d = c2 − c1 as a signed difference of 8-bit
   locations. Since c is in 1/256 of a period and the groups are 1024
   samples apart, the correction d/2^18 is simply `lambda − d` in the
   18-bit format. Reconstruct with that value.
3. **FIND_EYE.** Check with the coarse search's criterion that the eye
   over group 1 is still open.
4. **RECONSTRUCT_BAR.** If the eye closed, the drift was more than half a
   period in the other direction and wrapped around. Reconstruct with
   d − 256 (when d > 0) or d + 256 and set `wrapped`. No further check
   follows.

`main_fsm` runs this module twice:

| phase | group 1 | group 2 | bins |
|---|---|---|---|
| low resolution | 0..1023 | 1024..2047 | 32 |
| high resolution | 0..2047 | 1024..3071 | 64 |

The wrap is not rare. The coarse search accepts a lambda as soon as the eye
opens, and that can leave a drift of more than half a period over 1024
samples. In the full-system simulation the low-resolution stage took the wrap
path in three of five runs.

## Run sequence

`main_fsm` runs this sequence after a `start` pulse:

| phase | what happens | time at 75 MHz |
|---|---|---|
| CAPTURE | `sh_enable` high; 3072 samples stored | 15 µs |
| estimate | estimator cleared, enabled, waited for | 650 µs |
| COARSE | coarse search | 55 µs per trial |
| FINE_LO | low resolution fine correction | ≈ 85 µs, +40 µs on a wrap |
| FINE_HI | high resolution fine correction | ≈ 125 µs, +40 µs on a wrap |

The module also:
- routes `tau_calc` and `eye_finder` to whichever module is active and
  masks the other;
- selects 64 bins only in FINE_HI.

`done` rises at the end with `lambda_out`. A coarse failure ends the run at
once with `fail`, and `lambda_out` is then the initial estimate. The status
outputs show what the correction did:
- `coarse_trials` counts the search's trials;
- `fine_wrapped` shows the wrap: bit 1 for the low and bit 0 for the high
  resolution stage.

### Reusing a locked lambda

Lambda does not change while the two frequencies stay the same. After one
full run, later runs can skip the expensive parts. Hold `use_locked` high
with `start`, and the run does the following:
- captures a new snapshot;
- goes straight to the fine stages, starting from the previous
  `lambda_out`, so the fine correction still tracks slow drift;
- skips estimation and the coarse search, so `coarse_trials` keeps its old
  value.

Such a run takes about 17k system cycles (225 µs) instead of about 2 ms.

### The 2048-sample variant

`FINE_STAGES = 1` stops after the low-resolution stage. Together with
`N_SAMPLES = 2048`, that gives a smaller variant: two thirds of the memory,
for a somewhat larger final error. In simulation the error was up to
6e-5, against 3e-5 with two stages. `fine_wrapped` bit 0 then belongs to
the single stage.

## Where this RTL departs from the reference system, or fills gaps

- **Memories.** The reference sizes a 3072 × 16 single-port SRAM. Here
  there are two 3072 × 8 register arrays. The sample array has its own
  write clock, so the ADC can write at its rate.
- **Host port.** A PC link (I2C or similar) was only planned. This RTL has
  a simple host read port instead.
- **Estimator.**
  - The second synchroniser flop and the sticky sample-counter overflow
    are additions.
  - The window error described above is inherent to the counting scheme.
- **Eye finder.**
  - An empty bin side gives opening 0.
  - Output goes to the window centre.
  - The first maximum wins on ties.
  - The extra result cycle is a choice made here.
- **Fine correction.**
  - No check is made after RECONSTRUCT_BAR.
  - The open-eye check uses group 1 of the current phase.
- **Coarse failure.** It skips the fine stages.
- **Extra controls.** The `use_locked` input and the `FINE_STAGES`
  parameter are this design's way of offering two options:
  - reusing a locked lambda, which was described only as a usage
    recommendation;
  - the single-stage variant, which was suggested as an area saving.
- **Reset.** Every register has an asynchronous active-low reset (the
  estimator: an asynchronous clear). Reset behaviour was not specified.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_SAMPLES` | 3072 | top, `mem_ctrl`, `tau_calc`, `main_fsm` |
| `CNT_W` | 10 | estimator counters |
| `DATA_DIV_STAGES` / `CLK_DIV_STAGES` | 5 / 7 | subrate dividers (÷128 overall for both) |
| `MIN_RANGE` / `MAX_DEVIATION` | 32 / 16 | open-eye criterion, coarse and fine |
| `STEP` | 2^-11 (128 in 18-bit units) | coarse search step |
| `MAX_TRIAL` | 512 | coarse search limit (2048 would cover the whole lambda range) |
| `GROUP_FIRST` / `GROUP_LAST` | 0 / 1023 | coarse search sample group |
| `FINE_STAGES` | 2 | top, `main_fsm`: 1 runs only the low-resolution fine stage |

These are fixed in `eyerec_pkg`:
- lambda: 18 bits;
- tau: 8 bits;
- samples: 8 bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb/adc_eye_model.sv` stands in for the channel, the sample and hold and
the ADC:
- it shows random NRZ data at bit phase frac(n · lambda_true + phase0);
- its edges are raised-cosine and spill half a bit into each neighbour,
  which gives a round-topped eye;
- it adds uniform noise.

`tb_eye_recon_top` runs the whole design at its default parameters:
- 75 MHz system clock;
- 201.67 MHz sampling clock;
- PRBS15 data at 10 Gb/s and at 1 Gb/s;
- large and small eyes;
- one run with a locked lambda;
- one noise-only capture.

It checks:
- the estimate against the window bound;
- the final lambda, to within 24/2^18;
- every one of the 3072 tau values, read back through the host port;
- the opening of the rebuilt eye.

It also counts each mechanism: capture, estimation, coarse retries, coarse
success, coarse failure (all 512 trials), fine correction with the
wrap-around retry, the high-resolution stage and the locked run. One that
never happens is a failure.

`tb_eye_recon_2048` runs the four cases (10 and 1 Gb/s, large and small
eye) on the 2048-sample, single-fine-stage variant, and allows a final
error of 48/2^18.

Typical results:

| case | estimate (ideal) | coarse trials | final lambda error | fine wrap |
|---|---|---|---|---|
| 10 Gb/s, large eye | 592 (600.1) | 30 | 1.4e-5 | low res |
| 10 Gb/s, large eye, other phase | 556 (600.1) | 176 | 2.9e-5 | none |
| 1 Gb/s, large eye | 981 (981.6) | 2 | 1.8e-5 | none |
| 1 Gb/s, small eye | 979 (981.6) | 10 | 1.2e-5 | low res |
| 10 Gb/s, small eye | 583 (600.1) | 68 | 1.5e-6 | low res |

The first case takes 193k system cycles (2.6 ms). The reference system
reports 2.3 ms, 25 trials and a final error of 2.3e-5 for the same clocks.

To simulate with Verilator 5, for example the full system:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  --top-module tb_eye_recon_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/eyerec_pkg.sv tb/tb_eye_recon_top.sv
obj_dir/Vtb_eye_recon_top +verilator+rand+reset+2
```

The full-system run takes about half a minute. Replace the top module name
to run another testbench. `+verilator+rand+reset+2` starts every
unreset register at a random value, so a missing reset shows up.
