# On-chip static linearity self-test for a 12-bit SAR ADC

A SAR ADC inside a microcontroller has to be tested for integral and
differential non-linearity (INL, DNL), offset and gain error. The usual way
drives the ADC with a precise external ramp and builds a code histogram. That
needs a signal generator far more linear than the ADC, plus a tester to hold
and crunch the data.

This design does the test on chip, with no external equipment and no processor:

* A 14-bit R-2R ladder DAC on the same die generates the ramp, stepped by a
  14-bit counter. The ladder is *not* assumed to be linear.
* The ramp is converted twice. The second time, a constant shift ("offset
  enable") is added to the input. Subtracting the two code records cancels the
  ramp's own non-linearity. What remains is a function of the ADC's errors
  alone (the USER-SMILE idea).
* A hardware least-squares solver identifies the ADC's INL from that
  difference, using a *segmented* model: the error of code C is the sum of three
  table entries, indexed by its top, middle and bottom 4 bits.
* The per-code INL/DNL is derived from that model and checked against
  programmable limits. The worst values and a pass/fail verdict are locked in
  status registers, and the whole INL curve is kept in a small RAM for read-back.
* The ADC, now characterised, is then used as a measuring instrument for the
  DAC. With the ADC's own INL removed from the measurement, a segmented model of
  the DAC error is fitted. It is turned into a *predistortion table* that makes
  the DAC linear in normal operation (the ROME step).

Everything except the DAC and ADC is synthesizable SystemVerilog. The two
analog parts are behavioural models with `real` ports, so the whole loop can be
simulated.

## Block structure

```
                 test_mode                              +--------------------+
 func_dac_code ----------+                              | usmile_estimator   |
                         v                              |  (segment LS fit)  |
 ramp_counter --> dac_mux --> r2r_dac_model --+         +---------+----------+
      ^             ^  (pred)                 | test    e_M,e_I,e_L|
      |             |                         v                    v
      |             |                ain -> [mux] -> sar_adc_model  linearity_eval
      |             |                                   |           (INL/DNL, limits,
      |             |                                   | code       pass/fail)
 bist_fsm ----------+-----------------------------------+             |
 (registers,        |                                                 |
  sequencing)   mem_mux <---- est / eval / rome / fsm / host requests-+
                    |                                                 |
               bist_memory (4 x 16384 x 16 bit)  <----  rome_unit (DAC model,
                                                        predistortion table)
```

| Module | Role |
|---|---|
| `adc_bist` | top: wires everything, test/normal multiplexing, host read port |
| `bist_fsm` | controller and status registers: sweeps, phase order, limits, locked results, offset/gain error |
| `ramp_counter` | 14-bit code counter with clear and step |
| `dac_mux` | DAC code from the ramp counter (test), the predistortion table or the plain functional code (normal) |
| `r2r_dac_model` | behavioural 14-bit R-2R DAC with bit-weight mismatch and offset enable |
| `sar_adc_model` | behavioural 12-bit charge-redistribution SAR ADC, one bit per clock, capacitor errors, offset enable |
| `mem_mux` | gives the single memory port to the unit that owns the current phase |
| `bist_memory` | 64 K x 16-bit synchronous single-port RAM |
| `usmile_estimator` | identifies the 48 segment errors of the ADC by least squares |
| `linearity_eval` | per-code INL/DNL, worst values, limits, verdict; writes INL(C) to memory |
| `rome_unit` | fits the DAC error model and writes the predistortion table |
| `serial_div` | restoring divider shared by the estimator and ROME unit (helper) |
| `bist_pkg` | sizes, fixed-point formats, memory map, request struct and enums |

## The two-ramp identification

### Why two ramps

Let the ADC's transition level for code C be `C + E(C)` LSB, and let the ramp
be some unknown monotonic but non-linear function `r(k)` of the DAC code k.
Converting `r(k)` gives code C1(k). Converting `r(k) + alpha` gives C2(k).
To within quantisation:

```
C1 + E(C1) ~ r(k)        C2 + E(C2) ~ r(k) + alpha
=>   E(C2) - E(C1) = alpha - (C2 - C1) + noise
```

The ramp `r(k)` is gone. Every DAC code yields one equation that involves only
the ADC's error function, at two codes about `alpha` apart. The DAC does not
need to be accurate, only repeatable and fine-grained enough (14 bits, so about
four DAC steps per ADC code).

### Segmented model

With 4096 codes, `E(C)` has too many unknowns to identify quickly. The model
splits the 12-bit code into three 4-bit fields:

```
E(C) = e_M[C(11:8)] + e_I[C(7:4)] + e_L[C(3:0)]        48 unknowns
```

This matches how a binary-weighted capacitor array fails: each capacitor's error
adds whenever its bit is set. So the model captures a SAR ADC's INL almost
exactly, while cutting the unknowns from 4096 to 48.

Each usable pair (neither code at 0 or 4095, which may be clipped) is one row of
a linear system. The row has +1 in the columns of C2's three fields and -1 in
those of C1's, so a field shared by both codes cancels. The right-hand side is
`alpha - (C2 - C1)`.

### What the data cannot see

Some components of the unknowns are not determined by differences:

* a constant added to any one of the three tables;
* a straight line in E, which is equivalent to an error in alpha.

Neither matters for INL. The best-fit line that `linearity_eval` removes
absorbs both, and the constants. For the same reason alpha only has to be
roughly right. It is estimated as the mean of `C2 - C1`; the ADC's own
non-linearity biases that slightly, which is harmless.

### The solver (`usmile_estimator`)

An iterative LMS update was not accurate enough at this noise level. The unit
therefore solves the least-squares problem properly:

1. **CLR.** Zero the 48 x 48 normal matrix `A` (one entry per clock).
2. **ACC.** One pass over the 16384 stored pairs:
   * read C1, C2;
   * add the row's outer product into `A` (36 non-zero entries, one per clock);
   * accumulate `s1 = sum r` and `s2 = sum r (C2 - C1)`;
   * accumulate the sum and count of `C2 - C1`.
3. **ADIV.** Compute alpha = mean(C2 - C1) in Q16, with the serial divider.
4. **RDIV.** Compute the reciprocal `2^24 / A[u][u]` of each diagonal entry.
5. **GS.** Run 200 Gauss-Seidel sweeps on `A x = alpha*s1 - s2`:
   `x[u] += (b[u] - sum_i A[u][i] x[i]) * recip[u]`.
   This takes 49 clocks per unknown per sweep. `A` is symmetric and positive
   semi-definite, so Gauss-Seidel converges. The undetermined directions simply
   stay where they start.

The outputs are `e_msb`, `e_isb`, `e_lsb` in signed Q8 (256 = 1 LSB) and alpha
in Q8. The run length is fixed:
`1 + 48*48 + 39*16384 + 50*49 + 200*48*49 = 1,114,131` clocks.

## INL, DNL and the verdict (`linearity_eval`)

For C = 0 .. 4095, one code per clock:

```
E(C)   = e_M + e_I + e_L                         (table lookups)
INL(C) = E(C) - (a + b * (C - 2047.5))           (least-squares line through E)
DNL    = INL(C) - INL(C-1)
```

INL is taken against the best-fit line, as the source specifies. No pass over
the data is needed to find that line, because E is a sum of segment terms:

* Each table entry occurs in 256 codes. So the mean `a` is the sum of all 48
  entries divided by 16.
* `sum((2C - 4095) * E(C))` is a fixed weighted sum of the 48 entries. The
  weight of entry j of a segment with code weight w (256, 16 or 1) is
  `2 * (256 * w * j + (273 - w) * 16 * 120) - 4095 * 256`.
* Dividing by `sum((2C - 4095)^2)` is a multiply by a constant reciprocal.
  This gives `b`, with 24 fraction bits.

All of this is combinational from the tables and is registered when `start`
arrives, so the evaluation still takes one clock per code. The unit does the
following:

* writes `INL(C)`, saturated to 16 bits, to memory region INL, so the curve can
  be read back and plotted;
* tracks `max |INL|` and `max |DNL|`;
* sets `pass = max_inl <= inl_limit && max_dnl <= dnl_limit`.

Limits and results are unsigned Q8 LSB.

## Offset and gain error (`bist_fsm`)

These come straight from the first capture:

* **offset error** = ADC code at DAC code 0;
* **gain error** = ADC code at the last DAC code, minus 4095, minus the offset
  error.

Both are signed, in whole LSB. They are measured against the ramp, so they
include the ramp's own offset and gain. They are meaningful only as far as the
DAC's end points are trusted.

## DAC predistortion (`rome_unit`)

After evaluation the ADC's INL is known, so the ADC can measure the DAC. For
DAC code k, the unit reads C1(k) and INL(C1) and forms an estimate of the DAC
output in Q8 ADC LSB:

```
m(k) = 256*C1 + INL(C1) + 128          (middle of the corrected code bin)
y(k) = m(k) - 64*k                     (error against the ideal ramp; 1 DAC LSB = 64)
```

A single ADC code spans four or more DAC codes, so `y(k)` on its own is a
staircase. Correcting code by code makes things *worse* inside wide ADC codes.
The unit instead fits a segmented model of the DAC, which is exact for a ladder
whose bit weights are off:

```
y(k) ~ mu + a[k(13:9)] + b[k(8:4)] + c[k(3:2)]            68 terms
```

Bits k(1:0) lie below the ADC's resolution and are not modelled. Leaving them
out lets every segment mean average the quantisation error away.

Over a complete sweep, every combination of segment values occurs equally
often. The least-squares fit of this additive model is then just the segment
means minus the grand mean. So the unit:

1. accumulates per-segment sums and counts in one pass (3 clocks per code);
2. divides them (69 divisions of 34 clocks);
3. writes the table (1 clock per code).

The fitted error is `err(c) = mean_M + mean_I + mean_L - 2*mean_all`. To
invert it, the unit computes:

* `p1 = k - err(k)`;
* `p2 = k - err(p1)`;
* the neighbours `p2 - 1` and `p2 + 1`.

It keeps whichever of these four codes has a modelled output closest to k. The
neighbour search matters at the ladder's big carry transitions. There the output
jumps by several LSB, and the fixed-point step lands on the wrong side of the
gap.

In normal mode with `cal_en` set, the top reads `PRED[func_dac_code]` every
clock and drives the DAC with it. The DAC output follows the code with one
clock of latency.

## Memory map and host access

One single-port RAM of 16-bit words. Read data appears one clock after the
request and holds until the next read. The address is `{region[1:0], index[13:0]}`:

| Region | Index | Contents | Written by |
|---|---|---|---|
| 0 `REG_CAP1` | DAC code | ADC code, offset disabled | FSM (sweep 1) |
| 1 `REG_CAP2` | DAC code | ADC code, offset enabled | FSM (sweep 2) |
| 2 `REG_PRED` | wanted DAC code | predistortion DAC code | ROME unit |
| 3 `REG_INL` | ADC code (0..4095) | INL(C), signed Q8 LSB | linearity_eval |

`mem_mux` gives the port to the unit that owns the current phase. An assertion
checks that no other unit writes. When no test is running, the port belongs to
the host:

* `host_rd_en` / `host_addr` read any word;
* `host_rdata` returns it one clock later.

While `cal_en` is set in normal mode, the port is busy with the predistortion
lookup.

## A test run

Start a test with `test_mode = 1` and a one-clock `bist_start` pulse. The limits
are latched at that moment. `bist_busy` stays high until the results are
locked. A start without `test_mode` is ignored.

| Phase | What happens | Clocks (defaults) |
|---|---|---|
| sweep 1 | for each of the 16384 DAC codes: start the ADC, 12 bit decisions, store the code | 16384 x 14 = 229,376 |
| sweep 2 | the same with offset enable on | 229,376 |
| estimate | `usmile_estimator` | 1 + 1,114,131 |
| evaluate | `linearity_eval` | 1 + 4,097 + 1 |
| predistort | `rome_unit` | 1 + 67,883 |
| **total** | start pulse to `bist_busy` low | **1,644,866** |

At 100 MHz that is about 16 ms. Estimation dominates, and most of it is
Gauss-Seidel sweeps: fewer sweeps (`GS_SWEEPS`) shorten the test at some cost in
accuracy.

After the run, these hold until the next start:

* `bist_done`, and exactly one of `bist_pass` / `bist_fail`;
* `max_inl`, `max_dnl`, `offset_err`, `gain_err`, `alpha_est`.

In normal mode (`test_mode = 0`):

* the ADC converts `ain` on `func_adc_start`, with `adc_done` / `adc_code`
  12 clocks later;
* the DAC converts `func_dac_code`, directly or through the predistortion
  table.

## Accuracy

These figures come from simulation against the behavioural models at default
sizes. The model ADC has a 4-LSB error on its MSB capacitor, with a worst INL
of 4.14 LSB (best-fit line) and a worst DNL of 5.55 LSB.

| Quantity | True (model) | Reported by the BIST |
|---|---|---|
| worst INL | 4.14 LSB | 3.92 LSB |
| worst DNL | 5.55 LSB | 4.82 LSB |
| INL curve, worst code error | - | 0.47 LSB |
| shift between the sweeps | 40.96 LSB | 40.93 LSB |

The estimator's unit test uses a strongly bowed ramp and different capacitor
errors. There the recovered INL is within 0.34 LSB at every code and 0.11 LSB
on average. That is as good as an exact floating-point least-squares fit of the
same quantised data.

The error is largest next to the big MSB transition. The ADC has missing codes
there, and the quantised records carry little information. Worst DNL in such a
region is underestimated by up to about 0.75 LSB.

Off-chip comparison (`tb_bist_vs_offchip`): an ideal external ramp with
8 steps per LSB, giving 32800 conversions. Both curves are referred to the
line through codes 1 and 4095.

| | histogram | BIST |
|---|---|---|
| worst INL | 4.46 LSB | 4.39 LSB |
| worst DNL | 5.50 LSB | 4.82 LSB |
| largest per-code difference, INL / DNL | - | 0.61 / 0.68 LSB |

The histogram finds 22 missing codes around the MSB transitions. Their
transition levels are not defined there, because the ADC is non-monotonic.
Both methods give the same verdict.

The same testbench then sends the on-chip DAC ramp, codes 0..16383, into the
ADC in normal mode. Each capture is compared with the ideal code k/4, and a
best-fit line is removed. After the on-chip INL of the captured code is added
back, 1.43 LSB RMS is left with the raw ramp and 0.34 LSB with the
predistorted one. Quantisation alone accounts for 0.29 LSB. With the
predistorted ramp, the capture error correlates with the on-chip INL at 0.99.

For the DAC, measured against its best-fit line over codes 256..16127:

| | raw | predistorted |
|---|---|---|
| RMS deviation | 5.12 DAC LSB | 0.63 DAC LSB |
| worst deviation | 8.47 DAC LSB | 6.00 DAC LSB |

The worst predistorted values occur at isolated codes next to the DAC's output
jumps of several LSB, where no code can reach the target.

## Behavioural models

`sar_adc_model` samples `vin` (plus `OFFSET_V` when `offset_en` is set) on
`start`, then decides one bit per clock, MSB first. It compares against a
capacitor array in which capacitor i is off by
`MSB_ERR_LSB * sin(2.3 i + 1.1) * sqrt(2^i / 2^11)` LSB. `done` follows
12 clocks after start.

`r2r_dac_model` is combinational. Bit i carries a relative weight error of
`MISMATCH * sin(1.7 i + 0.4) * (i + 1) / 14`, and `offset_en` adds `OFFSET_V`.
Both models are fixed and deterministic, so results repeat exactly. Change the
parameters to test other error patterns.

The top cannot be run through synthesis as a whole because of the `real`
nets. Every other module is synthesizable on its own. In silicon the two models
are replaced by the analog macros.

## Where this design departs from, or fills in, the source description

The source describes the architecture, the segmented INL model and the
two-offset-ramp equation. It names the ROME step and the predistortion code.
It does not describe any internal arithmetic, widths, handshakes or timing.
The following are this design's own:

* **Sizes.** The source calls the ADC 12-bit, yet shows captures over codes
  0..16383. This design reads that range as the 14-bit DAC/counter range: a
  12-bit ADC and a 14-bit ramp with 16384 captured points.
* **Fixed point and segments.** Q8 error format, 4/4/4-bit ADC segmentation,
  5/5/2-bit DAC segmentation, 16-bit memory words, one memory port.
* **Solver.** Normal equations plus Gauss-Seidel, with alpha as the mean code
  difference. The source says only "system identification".
* **INL line.** The source asks for the best-fit line, and this design uses it.
  Computing that line in closed form from the segment tables is this design's
  own method.
* **Offset and gain error.** Defined from the first and last captured codes.
* **Phase order and sweep.** The phases run in a fixed order, with one
  conversion per DAC code.
* **ROME unit.** The DAC fit by segment means and the inversion step are this
  design's own.
* **Normal-mode predistortion.** The table lookup with one clock of latency is
  this design's own.
* **DAC figures.** The source also names the DAC's INL, DNL and gain error
  among the results of the algorithm. Here the fitted DAC error is used only to
  build the predistortion table. It is not reported as separate numbers.
* **Histogram test.** The source checks the on-chip result against an off-chip
  ramp-histogram test. That test is a reference measurement made by external
  equipment, so it is not in the RTL. The testbench `tb_bist_vs_offchip` plays
  the part of that equipment.

## Simulating

Every testbench is self-checking, prints
`TB_RESULT checks=<n> failures=<n>`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv -Irtl \
          rtl/bist_pkg.sv tb/tb_adc_bist.sv --top-module tb_adc_bist -o sim
./obj_dir/sim
```

Replace `tb_adc_bist` with any testbench below:

| Testbench | Checks |
|---|---|
| `tb_adc_bist` | Full default size, about 2.5 s. Two complete self-tests (one must pass, one with a tight INL limit must fail). Run time in clocks. Worst INL/DNL and every read-back INL value against the model's true INL. Offset and gain. Normal-mode conversions. Raw versus predistorted DAC. Counts each mechanism (both sweeps, clipped codes, pass, fail, predistortion lookups, read-back, normal conversions) and fails if any never occurred. |
| `tb_bist_vs_offchip` | Full default size, about 2 s. One self-test, then an off-chip ramp-histogram test of the same ADC in normal mode. Compares INL and DNL per code and worst-case, the missing codes, and the pass verdict. Then captures the on-chip DAC ramp, raw and predistorted, and checks that the on-chip INL explains the calibrated capture. |
| `tb_usmile_estimator` | INL recovered from synthetic captures of a bowed ramp, per code and on average; alpha; exact latency |
| `tb_linearity_eval` | every stored INL value, worst INL/DNL, verdict just above and below the limits, latency |
| `tb_rome_unit` | every table entry against an independent reference; predistorted DAC against the best reachable code; latency; writes only to REG_PRED |
| `tb_bist_fsm` | phase sequence with stand-in units, capture contents, offset/gain, locking, start rules |
| `tb_sar_adc_model`, `tb_r2r_dac_model` | ideal behaviour with errors off, offset enable, timing, error bounds |
| `tb_ramp_counter`, `tb_dac_mux`, `tb_mem_mux`, `tb_bist_memory` | exhaustive or random checks of the small blocks |

Other Verilator warnings remain (unused bits, width extensions in constant
expressions, and `rst_n` used both as an asynchronous reset and in an assertion's
disable condition). None of them affects the circuit.
