# Dual-slope QRS detector

A small FPGA-style detector that finds the QRS complex (the sharp R spike of
a heartbeat) in a sampled ECG. It is cheap enough for a wearable sensor node:
two subtractors, one 8x8 multiplier, a comparator and an XOR gate.

The idea is the *dual-slope* test. Look at a centre sample and at one sample
on each side of it, each 0.027 s away (10 samples at 360 Hz). Form the slope
on each side. If the two slopes are both steep and have opposite signs, the
centre sample sits at a sharp peak or trough, which is what a QRS complex
looks like. Broad P and T waves have shallow slopes, and a steep but
monotonic flank has slopes of equal sign, so both are rejected.

## The detection rule

With `x[n]` the newest sample read in a cycle, `D1 = 10` and `D2 = 20`:

```
SL     = x[n-D1] - x[n]         centre minus newest
SR     = x[n-D2] - x[n-D1]      oldest minus centre
S_mult = SL * SR
thresh = |S_mult| > THRESHOLD
pole   = SL[7] ^ SR[7]          slopes of opposite sign
de1    = thresh &  pole         QRS extreme detected at the centre sample x[n-D1]
de0    = thresh & ~pole         steep, but the slopes have the same sign
```

Both slopes are measured in the same time direction. At a peak they have
opposite signs, so the signed product there is **negative**. The threshold
is therefore applied to the magnitude `|S_mult|`. A threshold on the signed
product (`S_mult > θ` with θ > 0) could never fire at a peak with this slope
convention.

The slopes are not divided by their distance. The distance is the same on
both sides, so dividing would only scale the product, and the threshold
absorbs that scale.

The slopes are 8-bit two's-complement differences of 8-bit unsigned samples,
and the XOR looks at their MSBs. That is exact only while
`|x[a] - x[b]| < 128` for samples 10 apart. An ECG scaled to 8 bits
normally keeps far below that: the built-in record's largest slope is 56. A
record with bigger jumps wraps around and gives a wrong sign.

## Architecture

```
 counter1 -> ROM1 (record, delay 0)  --out1--+--> subtr1: SL = out2 - out1 --+--> multiply --> compar (|p| > THRESHOLD) --thresh--+
 counter2 -> ROM2 (record, delay D1) --out2--+                               |                                                   v
 counter3 -> ROM3 (record, delay D2) --out3-----> subtr2: SR = out3 - out2 --+                                              demux1_2 --> de0, de1
                                                   SL[7], SR[7] ------------------> xor21 ------------pole (select) ----------->   |
                                                                                                                          de1 --> peak_counter
```

| Module | Role |
|---|---|
| `addr_counter` | 10-bit free-running address counter, wraps 1023 → 0. There are three, one per ROM, and they run in lock step (an assertion in the top checks this). |
| `ecg_rom` | 1Kx8 single-port ROM with a registered output (block-RAM style). Its `DELAY` parameter fills word *i* with sample *i − DELAY*. |
| `slope_sub` | 8-bit subtractor, `diff = a − b`, plus a carry out (1 = no borrow). |
| `slope_mult` | Signed 8x8 → 16 multiplier. |
| `threshold_cmp` | `above = |prod| > ref_in`. |
| `polarity_xor` | XOR of the two slope sign bits. |
| `decision_demux` | 1-to-2 demux: the threshold result goes to `de1` when the polarity select is high, else to `de0`. |
| `peak_counter` | Counts rising edges of `de1`, saturating. |
| `dual_slope_qrs_top` | Wires them together. |
| `qrs_pkg` | Shared widths, default constants and the built-in synthetic record. |

### Why the delays live in the ROM contents

There is no delay line in the datapath. Each ROM holds a copy of the same
record that is already shifted by 0, D1 or D2 samples. All three ROMs are
read at the same address, so in one cycle they return the newest, centre and
oldest samples of the window. The only storage is the three 1Kx8 ROMs and
three 10-bit counters. In the original flow the shifted copies were prepared
offline. Here `ecg_rom` builds them at elaboration from `DELAY`. Words
before the start of the record (the first `DELAY` words) repeat sample 0.

Because the ROMs hold a fixed record, the design is a demonstrator that
replays one stored ECG forever. It does not take a live sample stream. To
process live data you would replace the three ROMs with a 21-sample shift
register or a circular buffer. That is not part of this RTL.

### Timing

One sample is processed per clock. Take a cycle in which the counters hold
address *a*. In the next cycle the ROMs present `x[a]`, `x[a−D1]` and
`x[a−D2]`, and `de0`/`de1` follow combinationally in that same cycle. There
are no pipeline registers after the ROM outputs: the only flip-flops are the
30 counter bits, the ROM output registers and the peak counter. A `de1`
pulse therefore refers to the centre sample `x[a−D1]`. It comes one clock
after the counter reached *a*, and D1 samples after that sample was the
newest one. `peak_count` updates in the clock after a rising edge of `de1`.

`rst` is synchronous and active high. It clears the counters, the ROM output
registers and the peak counter, so `de0`/`de1` are 0 in the first cycle after
reset.

### What to expect on a real beat

The detector has no local-extreme search and no adaptive threshold. Near a
QRS complex, `de1` is typically high for a few consecutive cycles. A single
beat can also give two runs: one at the R maximum, and one at the S minimum
that follows a steep R downstroke, since the S minimum has steep opposite-sign
slopes too. `peak_counter` counts runs (rising edges), so its count is an
upper bound on the beats. To turn it into a heart rate you need either a
refractory window (ignore `de1` for ~200 ms after a detection) or the
local-maximum search of the full dual-slope algorithm. Neither is built here.

## Stored record

The `INIT_FILE` parameter of the top (and of `ecg_rom`) selects the ROM
contents:

* `""` (default): a synthetic 360 Hz ECG computed by `qrs_pkg::ecg_synth`.
  It has one beat every 288 samples (75 beats/min) on a baseline of 80, built
  from triangular waves:

  | wave | centre | half-width | amplitude |
  |---|---|---|---|
  | P | 40 | 12 | +12 |
  | Q | 78 | 4 | −12 |
  | R | 100 | 18 | +100 |
  | S | 122 | 4 | −20 |
  | T | 190 | 30 | +24 |

  Here `p = n mod 288` is the position in the beat. A wave adds
  `sign(A)·floor(|A|·(hw − |p − c|)/hw)` where `|p − c| < hw`. A ripple
  `((37·n) mod 5) − 2` is added on top, and the result is clamped to 0..255.
  The QRS is 0.1 s wide, the top of the normal 0.06–0.1 s range.
* a file name: a `$readmemh` file of 1024 two-digit hex samples, with its path
  relative to the simulator's working directory. Use this for a real
  recording, for example an MIT-BIH record resampled or kept at 360 Hz and
  scaled to 8 bits. Some synthesis front ends ignore `$readmemh`. The
  built-in record needs no file, which is why it is the default.

The default `THRESHOLD = 1000` suits this record. R-peak products are about
3000 and T-wave products stay below 100. A real recording needs its own
threshold, depending on its gain.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `DATA_W` | 8 | sample width |
| `ADDR_W` | 10 | ROM depth 2^ADDR_W (1024 samples, 2.8 s at 360 Hz) |
| `D1` | 10 | centre-sample delay, round(0.027 s × 360 Hz) |
| `D2` | 20 | oldest-sample delay, 2·D1 |
| `THRESHOLD` | 1000 | magnitude threshold on SL·SR |
| `CNT_W` | 16 | peak counter width |
| `INIT_FILE` | `""` | ROM contents (see above) |

For another sampling rate `fs`, set `D1 = round(0.027·fs)`, `D2 = 2·D1` and
retune `THRESHOLD`. To hold a full 10 s record at 360 Hz (3600 samples), set
`ADDR_W = 12`.

## Departures and choices

These points are where this design decides something on its own:

* **D2 = 2·D1 = 20.** 0.054 s at 360 Hz is 19.44 samples, which would round
  to 19. The value 20 keeps the two sides symmetric about the centre sample,
  which the dual-slope test assumes.
* **Magnitude threshold.** See "The detection rule".
* **Signed multiplier.** The slope signs are in the MSBs, so the slopes are
  multiplied as signed numbers.
* **`de0` meaning.** `de0` is simply the other demultiplexer output: a steep
  sample whose slopes share a sign. It marks no detection.
* **Threshold as a parameter.** The detector's own I/O is only clock, reset,
  `de0` and `de1`, so the preset threshold is a constant, not a port.
* **Peak counter.** The detector is meant to feed a counter for heart rate.
  `peak_counter` is that counter, and its width, edge counting and
  saturation are choices of this design.
* **Not built:** the local-extreme search, the removal of multiple detections
  and the adaptive threshold update of the full algorithm. The ROMs hold a
  synthetic record, not a clinical one.
* **Unused carries.** The subtractor carries (`carryo1`, `carryo2` in the
  top) are computed but not used. The sign comes from the MSB.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops. Run them from the directory that
holds `rtl/` and `tb/`, because `tb/ecg_ref.hex` is opened by that relative
path:

```
verilator --binary --timing --assert --top-module tb_dual_slope_qrs_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/qrs_pkg.sv tb/tb_dual_slope_qrs_top.sv \
    -o simv && obj_dir/simv
```

Swap the top module and file for any other testbench:

* `tb_addr_counter`: count and wrap over 2.5 periods.
* `tb_ecg_rom`: every word for delays 0, 10 and 20, built-in and file-loaded contents, one-cycle latency.
* `tb_slope_sub` and `tb_slope_mult`: exhaustive over all 65536 input pairs.
* `tb_threshold_cmp`: boundaries and random values.
* `tb_polarity_xor`: all sign combinations.
* `tb_decision_demux`: all inputs.
* `tb_peak_counter`: random pulse trains and saturation.

`tb_dual_slope_qrs_top` runs the top at its default parameters for 2.5
passes over the record. In every cycle it compares `de0`, `de1` and
`peak_count` against an integer model of the rule above. It also checks
that every detection falls inside a QRS complex (beat positions 74..126)
and that every beat is detected. It counts each mechanism and fails if one
never occurs: `de1` pulses, `de0` pulses, extremes rejected by the
threshold, steep samples rejected by the polarity test, and counter wraps.
On the built-in record it sees 10 beats, all detected, as 20 `de1` runs (R
and S of each beat).

`tb/ecg_ref.hex` is the built-in record written out by a model separate from
the RTL. The testbenches use it as the reference. If you change
`ecg_synth`, regenerate it from the formula above.
