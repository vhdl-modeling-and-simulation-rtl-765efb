# Digital Image Synthesizer (DIS) in SystemVerilog

An inverse synthetic aperture radar (ISAR) builds an image of a target from the
way each range cell of the echo changes in phase from pulse to pulse. The
Digital Image Synthesizer defeats it by building a false echo. A digital RF
memory (DRFM) captures the radar pulse as a stream of 5-bit phase samples. The
DIS passes that stream along a chain of 512 *range bin processors* (RBPs). Each
RBP is one range cell of the false target. It rotates the phase by a programmed
increment (the cell's motion), turns the rotated phase into a unit I/Q vector,
scales it by a programmed power of two (the cell's radar cross-section), and
adds the result to the running I/Q sum from the cells in front of it. Samples
move one bin every two clocks while sums move one bin per clock, so bin *r*
meets each output *r* samples late. The output is then the sum of delayed,
phase-rotated and scaled copies of the pulse: the echo of an extended target
with 512 range cells.

Around the RBP chain sits control logic. It picks one of four sources for the
phase samples: two off-chip inputs, an on-chip pseudo-random self-test
generator, and a phase extractor that turns raw 8-bit I/Q DRFM samples into
phases. It also runs a self test that stops the chain after a chosen number of
vectors, so the accumulated signature can be read out and compared.

This RTL is a behavioural, synthesizable model of that chip at the register
level. It is clocked by one clock, and it reproduces the chip's published
simulation results bit for bit (see *How far it matches*).

## Top level: `dis_top`

```
                     path_sel
 ext0_in ──────────┐    │
 ext1_in ──────────┤ ┌──┴───┐  mux_out   ┌──────┐   ┌──────┐       ┌──────┐
 self-test LFSR ───┤ │ 4:1  ├───────────►│RBP 0 ├──►│RBP 1 ├─ ... ─►│RBP511├─► sample_out
 phase extractor ──┘ └──────┘            │      │   │      │       │      │
   ▲ drfm_i/q                prog_in ───►│      ├──►│      ├─ ... ─►│      ├─► prog_out
                            chain_in ───►│ sum  ├──►│ sum  ├─ ... ─►│ sum  ├─► chain_out
 start_selftest, test_count ──► counter/comparator/latch ──► oper (to every RBP)
```

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `prog_in` | in | `prog_t` (21) | programming word: `prb`, `unp`, `urb`, `sel[8:0]`, `gain[3:0]`, `pinc[4:0]` |
| `clk_prog_in` | in | 1 | Clock_Prog bit, carried along the chain |
| `chain_in` | in | `sum_t` (35) | I/Q partial sums, overflow flags and ODV from a preceding chip (tie to 0) |
| `ext0_in`, `ext1_in` | in | `sample_t` (6) | paths 1 and 2: `{psv, phase[4:0]}` |
| `drfm_i`, `drfm_q`, `iq_valid_in` | in | 8, 8, 1 | path 4: two's complement I/Q and its valid bit |
| `path_sel` | in | 2 | 00 path 1, 01 path 2, 10 self test, 11 phase extractor |
| `start_selftest` | in | 1 | starts the self-test generator (hold high for the whole test) |
| `test_count` | in | 12 | off-chip count for the self test (vectors + 3) |
| `oper_mux_io`, `oper_mux_sel` | in | 1, 1 | Operate/Maintenance source: `sel`=1 latch, `sel`=0 the `io` level |
| `chain_out` | out | `sum_t` | I, Q (16-bit two's complement), I/Q overflow, ODV of the last bin |
| `prog_out`, `sample_out`, `clk_prog_out` | out | | programming word, sample and Clock_Prog leaving the last bin |
| `mux_out` | out | `sample_t` | the sample fed into bin 0 |
| `oper` | out | 1 | Operate/Maintenance; low freezes every RBP |
| `selftest_done` | out | 1 | self test has reached its count |

Parameters: `N_RBP` = 512 and `ADDR_W` = 9. The word widths (5-bit phase,
4-bit gain, 8-bit table values, 16-bit sums, 12-bit count) are in `dis_pkg`.

## The range bin processor (`rbp`)

This is the part that needs the most care. Its arithmetic and timing decide
every output bit.

### Arithmetic

For a phase sample φ (0–31, one step = 11.25°), programmed increment `pinc`
and gain code `g`, one bin adds

```
    p     = (φ + pinc) mod 32                    phase_adder
    c, s  = round(127·cos(2πp/32)), round(127·sin(2πp/32))   sincos_lut, 8-bit
    k     = g[1:0] + 3·g[2] + 4·g[3]             0..10
    term  = floor(c · 2^k / 32),  floor(s · 2^k / 32)        gain_shifter
    sum_out = sum_in + term   (16-bit, wraps; overflow flag sticky)  sum_adder
```

The gain is a power of two. The shift is built from two multiplexer shifters:
0–3 from `g[1:0]`, then 0/3/4/7 from `g[3:2]`. The final `>>> 5` is an
arithmetic right shift, so the value is rounded towards −∞. As a result, a
bin at gain 0 adds 3 for cos = 127 but −4 for cos = −127. The largest term is
127·2^10/32 = 4064, so 16 bins at full gain and equal phase already overflow
16 bits. `iof`/`qof` then go high and stay high down the chain. The sum itself
wraps.

The original description gives neither the gain-to-shift mapping nor the
table values. The ones used here reproduce every entry of its published 1-,
4- and 16-bin result tables.

### Pipeline and how the cascade lines up

```
 sample_in ─►[A]─►[B]──────────────────────────────► sample_out   (2 registers)
              │    rot = A.phase + pinc
              │    [B: rot, valid=psv&urb, gain]─►LUT─►[C]─►shift─►[D]
 sum_in ────────────────────────────────────────────(+ D)─►[sum]─► sum_out (1 register)
```

A sample takes five clocks from `sample_in` to its contribution in `sum_out`.
It leaves on `sample_out` after two clocks, while a partial sum crosses a bin
in one clock. So when output *k* passes bin *r*, that bin is working on sample
*k − r*. Over the whole chain:

```
    chain_out(k) = Σ_{r : urb_r = 1, 0 ≤ k−r < L} term_r(φ[k−r])
```

Output *k* leaves the last bin `N_RBP + 4` clocks after sample *k* entered
bin 0: 516 clocks at full size, 20 for a 16-bin chain. A burst of *L*
samples gives *L + (last used bin)* outputs with ODV high. ODV is the OR of
"this bin added a valid sample" along the chain. An output is marked valid if
any bin contributed to it.

### Programming and double buffering

The programming word moves one bin per clock, in its own register chain. A
word with `prb` = 1 whose `sel` equals a bin's hard-wired address (bin *k*
has address *k*) loads `{urb, gain, pinc}` into that bin's **preload**
register. A word with `unp` = 1 copies preload to the **active** register in
every bin as it passes. Coefficients for the next target can therefore be
written while the current one is still being synthesised. To program:

1. Send one `prb` word per bin, one per clock.
2. Send one `unp` word.
3. Wait `N_RBP + 2` clocks until the last bin has taken it.

After reset every bin is inactive (`urb` = 0, gain 0, increment 0). A bin with
`urb` = 0 adds nothing and does not raise ODV. Programming keeps working while
`oper` is low.

### Freezing

`oper` low holds every data register in every bin: samples, terms and sums.
The chain's output then stays constant. When `oper` goes high again, the
chain continues as if the frozen clocks had never happened. The self test
uses this to hold its final signature.

## Sample sources and control (`dis_control`)

* **Path multiplexer** (`path_mux`): six 1-bit 4-to-1 cells (`mux4_bit`)
  switch `{psv, phase}`. The switch is combinational, so the selected
  sample reaches bin 0 on the next clock.
* **Self-test generator** (`self_test_lfsr`): a 12-bit maximal-length shift
  register with bit recurrence b[n] = b[n−6] ⊕ b[n−8] ⊕ b[n−11] ⊕ b[n−12].
  The phase sample is its five newest bits. It starts from a one-hot state,
  so the first vectors are 10, 08, 04, 02, 01, 00, 10, 08, 14, 0A, … (hex).
  The sequence repeats after 4095 vectors. PSV rises three clocks after
  `start_selftest`. Dropping `start_selftest` returns the generator to its
  start state.
* **Self-test stop**: a 12-bit counter (`test_counter`) counts clocks from
  the rise of `start_selftest`. An equality comparator (`eq_comparator`)
  compares it with `test_count` and, on a match, sets an ~S/~R latch
  (`sr_latch_n`). With `oper_mux_sel` = 1, `oper` is the latch's ~Q, so
  `oper` falls and the chain freezes. The count includes the generator's
  three start-up clocks, so **the chain receives `test_count − 3` vectors**.
  Use 64 for 61 vectors, or 53 for 50. `start_selftest` low resets the
  latch.
* **Operate/Maintenance multiplexer**: with `oper_mux_sel` = 0, `oper`
  simply follows `oper_mux_io`. Use that setting with `oper_mux_io` = 1 for
  paths 1, 2 and 4. It is also how a frozen chain is released to read out
  what it still holds.
* **Phase extractor** (`phase_extractor`): turns an 8-bit I/Q pair into a
  5-bit phase in three register stages, so the phase and its valid bit
  appear three clocks after the pair. The method is this design's own:
  1. Take the magnitudes of I and Q.
  2. If |Q| > |I|, swap them, so the ratio r = minor/major is at most 1.
  3. The step within the 45° octant is the number of thresholds
     {80, 341, 485, 847}/1024 that r reaches. Compare `minor·1024` with
     `major·T`, so no divider is needed.
  4. The signs of I and Q and the swap flag mirror the step into the right
     octant.

  Every result is within one step (11.25°) of atan2(Q, I). (0, 0) gives
  phase 0.

## How far it matches the original

The design reproduces these published results exactly:

* the single-bin table (32 samples);
* the 4-bin table (gains 0/4/8/C, increments 00/08/10/18);
* the 16-bin table (47 outputs);
* the 13-of-16 configuration;
* the 50-sample four-bin experiments on all four paths, run through the
  full 512-bin chip (on the phase-extractor path with I/Q pairs chosen at
  the listed phases);
* the self-test vector listing;
* 59 of the 60 listed phase-extractor points.

Where it departs from the original, or reads it one of two possible ways:

* **Phase extractor (1, 3)**. The published table gives phase 7 for
  (I, Q) = (1, 3), but phase 2 for (6, 2). Those two points mirror each other
  about 45°, and no octant-symmetric rule can give both. This design gives 6
  for (1, 3) and 2 for (6, 2).
* **Self-test count**. The original says both that the counter counts
  generated vectors (cleared while PSV is low), and that the off-chip count
  must be three more than the number of vectors wanted. This design follows
  the second. Because of that, a full 4095-vector self test cannot be
  requested: the 12-bit count stops at 4095, which gives 4092 vectors.
* **Operate/Maintenance select polarity**. One control table lists the latch
  select as 0 for the self-test path, but the step-by-step procedure sets it
  to 1. This design follows the procedure: 1 selects the latch.
* **Use Range Bin** is a programmed per-bin bit (1 = bin in use), stored
  with gain and increment. It is not an input level that flows along the
  chain.
* **Pipeline depth**. The original's "clear the pipeline" counts (11 clocks
  for 4 bins, 23 for 16) do not follow one rule. Here the latency is exactly
  `N_RBP + 4`. Each output lines up with the samples exactly as in the
  published tables.
* **Clocking**. The chip distributes its clock backwards along the chain and
  adjusts skew with the Clock_Prog bit. This model uses one synchronous clock.
  Clock_Prog is only carried along and brought out.
* **Not modelled**: the clock splitter and delay circuits, the pads, and the
  DRFM and host microprocessor around the chip.
* **Additions**: an asynchronous reset of every register, and a
  `selftest_done` status output.

The gate-level building blocks are written as behaviour, not as gate
netlists: the 5-bit carry-select adder, the load register, the comparator
and the multiplexer cells. Their function is the same.

## Files

`rtl/` (compile `dis_pkg.sv` first):

| File | Content |
|---|---|
| `dis_pkg.sv` | widths and the `sample_t`, `prog_t`, `coef_t`, `sum_t` types |
| `dis_top.sv` | chip top: control + RBP chain |
| `rbp_array.sv` | `N_RBP` cascaded RBPs, bin *k* with address *k* |
| `rbp.sv` | one range bin processor |
| `phase_adder.sv`, `sincos_lut.sv`, `gain_shifter.sv`, `sum_adder.sv`, `load_reg.sv` | RBP parts |
| `dis_control.sv` | path multiplexer, self test, phase extractor, Operate/Maintenance |
| `path_mux.sv`, `mux4_bit.sv`, `self_test_lfsr.sv`, `test_counter.sv`, `eq_comparator.sv`, `sr_latch_n.sv`, `phase_extractor.sv` | control parts |

`sr_latch_n` is a real level-sensitive latch (`always_latch`), as in the
original. It is the only latch in the design, and it is set and reset only by
the comparator and `start_selftest`.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_ref_pkg.sv`: independent reference arithmetic using `$cos`/`$sin`,
  real powers of two and the phase-extractor rule.
* `tb_dis_top.sv`: a 16-bin end-to-end test. It uses all four paths, the
  self-test freeze, off-chip freezes, overflow, unused bins, double-buffered
  programming, ODV and phase extraction, and fails if any of these never
  occurs.
* `tb_dis_full.sv`: the full 512-bin chip on all four paths against the
  published four-bin results. It runs in about a minute, most of it
  compiling.

Every testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5 (two-state, `--timing`):

```
verilator --binary --timing -Wno-fatal --top-module tb_dis_full \
    rtl/dis_pkg.sv $(ls rtl/*.sv | grep -v dis_pkg) \
    tb/tb_ref_pkg.sv tb/tb_dis_full.sv
./obj_dir/Vtb_dis_full
```

The package must come first on the command line. Replace `tb_dis_full` by
any other testbench name. `tb_rbp_array` and `tb_dis_top` instantiate the
chain with `N_RBP` = 16.

## Changing it

* **Number of bins**: `N_RBP`. `ADDR_W` must satisfy 2^`ADDR_W` ≥ `N_RBP`.
  Latency and the programming wait both scale with `N_RBP`.
* **Table resolution**: `sincos_lut` stores the nine quarter-wave values
  round(127·cos(2πp/32)), p = 0…8 (127, 125, 117, 106, 90, 71, 49, 25, 0),
  and mirrors them into the other quadrants. A wider table needs new
  entries, `LUT_W` in `dis_pkg` and the gain shifter's `DROP_LSB` changed
  together.
* **Phase-extractor accuracy**: change the four thresholds `TH` in
  `phase_extractor.sv`. Each one is a tangent × 1024 at a step boundary.
