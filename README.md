# ACOSD CFAR detector

A radar return is a stream of range cells. A cell holds a target when its
amplitude is well above the local clutter. In a homogeneous background a fixed
ratio to the mean of the neighbouring cells is enough, as in a cell-averaging
CFAR. The hard case is lognormal clutter with other targets nearby, as in a
desert environment. Those strong neighbours raise any estimate of the
background, and the cell under test is then missed.

The automatic censored ordered statistics detector (ACOSD) handles this case
without any prior knowledge of the clutter or of the number of interferers. It
sorts the reference cells. It then decides, one sample at a time, how many of
the largest ones are interfering targets and removes (censors) them. Finally
it builds the detection threshold from what is left. It comes in two versions
that search in opposite directions:

* **B-ACOSD (backward)** starts at the largest cell and censors while cells
  stand out.
* **F-ACOSD (forward)** starts just above the p-th smallest cell and accepts
  while cells look like clutter.

This RTL is a streaming hardware version of both detectors:

* It processes blocks of 256 range cells (16-bit samples).
* The window has 16 reference cells and two guard cells, with p = 12.
* B-ACOSD and F-ACOSD run side by side on every cell.
* One cell takes at most 11 clocks, which is 0.11 µs at 100 MHz.

The threshold coefficients are the published Monte Carlo values for a
false-alarm probability Pfa = 10⁻³ and a false-censoring probability
Pfc = 10⁻². Tables are included for windows of 16 (p = 12) and 36 (p = 24)
reference cells.

## The decision for one cell

Let X(1) ≤ X(2) ≤ … ≤ X(N) be the N reference cells in ascending order, and
X0 the cell under test (CUT).

The thresholds have the form `X(1)^(1-a) · X(j)^a`, with `a` above 1. In other
words they extend the spread between the smallest cell and a chosen order
statistic X(j). In the log domain that becomes a single multiply-add:

    log T = log X(1) + a · (log X(j) − log X(1))

This is why every sample that takes part in a test is first turned into a
logarithm (see *The logarithm table* below). The base of the logarithm does
not matter, because both sides of every test are logs.

**B-ACOSD.** For k = 0, 1, … N−p−1 it compares X(N−k) with
`T_ck = X(1)^(1-α_k) X(p)^α_k`:

* If the sample is above T_ck, it is an interfering target. It is censored and
  the test moves down by one cell.
* Otherwise the search stops.

k ends as the number of censored cells, between 0 and N−p. The CUT is a target
when it is above `T_ak = X(1)^(1-β_k) X(N−k)^β_k`. When k = N−p, the sample
X(N−k) is X(p).

**F-ACOSD.** For k = 0, 1, … N−p−1 it compares X(p+k+1) with
`T̂_ck = X(1)^(1-α̂_k) X(p+k)^α̂_k`:

* If the sample is not above the threshold, it is clutter. It is accepted and
  the test moves up by one cell.
* The first sample above the threshold is an interferer, and the search stops.

k ends as the number of accepted cells. The CUT is a target when it is above
`T̂_ak = X(1)^(1-β̂_k) X(p+k)^β̂_k`.

In both detectors a sample exactly equal to its threshold counts as clutter
(no censoring, no target).

Coefficients for (N, p) = (16, 12):

| k | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| α_k (B) | 2.596 | 2.038 | 1.709 | 1.443 | |
| β_k (B) | 1.635 | 1.889 | 2.12 | 2.37 | 2.64 |
| α̂_k (F) | 1.442 | 1.465 | 1.535 | 1.745 | |
| β̂_k (F) | 2.64 | 2.37 | 2.12 | 1.889 | 1.635 |

The two β tables mirror each other. That is expected: both detectors end with
a threshold on the same sample, X(N − #censored), and with the same
coefficient. In `acosd_pkg` the coefficients are kept in thousandths and
rounded to unsigned Q4.12. `acosd_pkg` also holds the (36, 24) tables.

## The logarithm table (`log_lut`)

Computing a logarithm per sample would cost more than the rest of the
detector. The table therefore has a step that grows with the sample. Samples
are unsigned Q11.5, so the range is 0 to 2047.97 in steps of 1/32.

| sample X | step | words |
|---|---|---|
| 0 ≤ X < 10 | 1/32 (every code) | 320 |
| 10 ≤ X < 100 | 1/8 | 720 |
| 100 ≤ X < 2048 | 1 | 1948 |

* The steps are powers of two, so a word address is a subtract and a shift of
  the sample.
* The table is split in two banks, as two block memories would be: X < 400
  (1340 words) and X ≥ 400 (1648 words).
* Each word holds log2 of the middle of its step, as signed Q5.10. In the
  finest segment it holds log2 of the sample itself.
* Zero reads as log2(1/32) = −5.
* The words are computed while the design is elaborated, with an integer
  repeated-squaring log2, so no data file is needed.
* The worst error, at the start of the 1/8 and the 1-wide segments, is about
  0.009 in log2. That is small against the spread of lognormal clutter.

Each detector has its own two-port copy of the table, so it reads two
logarithms per clock.

## Keeping the window sorted (`tap_delay_line`, `sorted_list`)

The window is a 19-tap shift register, with taps[0] the newest sample:

* taps[0..7]: leading reference cells
* taps[8]: guard cell
* taps[9]: the CUT
* taps[10]: guard cell
* taps[11..18]: lagging reference cells

The design does not re-sort the window for every cell. It keeps a separate
sorted list of the 16 reference values. When the window advances, two values
leave the reference set and two enter it:

* The oldest tap leaves, and the cell behind the guard enters the lagging half.
* The newest reference tap moves into the guard, and the new sample enters the
  leading half.

`sorted_list` applies one remove-and-insert per clock. All 16 positions are
computed in parallel: find the first entry equal to the leaving value, close
the gap, then open a gap at the insertion point. A window step therefore takes
two clocks. An assertion checks that the leaving value is really in the list.

The delay line and the list are both cleared to zeros at the start of a pass,
so they always hold the same multiset. Duplicate values are harmless.

## Timing

Per cell, in `acosd_cfar_top`:

| clocks | action |
|---|---|
| 1 | read the next sample from `sample_mem` |
| 2 | two sorted-list updates; the window shifts on the second |
| 1 | start both detectors |
| 3 + tests | detector: read log X(1) and log X(p); read the first candidate and the CUT; one clock per censoring test (each test overlaps the read of the next candidate); one detection clock; result |

Here *tests* means the number of censoring tests made by the slower detector,
between 1 and N−p.

* For (16, 12) a cell therefore takes 8 to 11 clocks, at most 0.11 µs at
  100 MHz.
* A 256-cell pass takes about 2825 clocks, or 28.3 µs.
* The first 9 window steps only fill the window. They take 3 clocks each and
  produce no decision.
* After the last sample, 9 zeros are shifted in, so that cells 247 to 255 are
  decided too.
* Cells near either end of the block thus see zeros in part of their window.
  A zero reads as the smallest log. This lowers X(1) and raises the thresholds,
  so edge cells are judged conservatively.

Each detector on its own (`b_acosd`, `f_acosd`) raises `done` 3 + tests clocks
after the clock in which `start` is high. It accepts a new `start` in the
clock where `done` is high. `sorted` and `cut` must not change in between.

## Top-level interface (`acosd_cfar_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (100 MHz target), asynchronous active-low reset |
| `ld_we`, `ld_addr`, `ld_data` | in | host writes one Q11.5 sample into the sample memory (only while idle) |
| `start`, `alg_sel` | in | start a pass while idle; `alg_sel` = 0 stores B-ACOSD decisions, 1 stores F-ACOSD decisions |
| `busy`, `done` | out | pass running; one-clock pulse at its end |
| `res_addr`, `res_data` | in/out | result RAM read, one-clock latency |
| `cell_valid`, `cell_idx` | out | one pulse per decided cell, with its index |
| `b_target`, `f_target` | out | the two decisions for that cell |
| `b_k`, `f_k` | out | cells censored by B-ACOSD; cells accepted above X(p) by F-ACOSD |
| `b_log_thr`, `f_log_thr` | out | log2 of the two detection thresholds, Q.10 |
| `b_count`, `f_count` | out | targets declared in the pass |
| `cycles` | out | length of the last pass in clocks |

The parameters are `N` (16), `P` (12), `NGUARD` (2) and `NCELLS` (256).
Coefficient tables exist for (N, P) = (16, 12) and (36, 24). Any other pair
stops elaboration with an error.

To operate the detector:

1. Write the samples through `ld_*`.
2. Pulse `start` with `alg_sel` set.
3. Wait for `done`.
4. Read the flags through `res_*`, or collect them from `cell_valid`.

## Number formats

| type | format |
|---|---|
| `sample_t` | 16-bit unsigned, Q11.5 |
| `log_t` | 16-bit signed log2, Q5.10 |
| `thr_t` | 24-bit signed log2 threshold, Q.10 (room for the extrapolation by up to 2.64) |
| `coef_t` | 16-bit unsigned, Q4.12 |

`acosd_pkg::log_threshold` computes the multiply-add. It keeps the full
product and shifts right arithmetically by 12.

## What follows the source design, and what does not

This RTL follows a published design closely in some places and departs from
it in others.

**Taken from the source design:**

* the censoring and detection algorithms and their coefficient tables
* the log-domain evaluation
* a logarithm look-up table with coarser steps for larger inputs, split into
  two memories at 400
* the incremental sorted list taking two clocks
* the sizes: 16-bit samples, 16 reference cells, two guard cells, p = 12,
  a 16×256 input memory and a 1×256 result memory
* the timing budget of 0.11 µs per cell at 100 MHz

**Departures and readings:**

* **Hardware instead of software.** In the source system the detectors run as
  C code on a soft processor, with the data memories on its bus. Here every
  step is logic, and the processor, the JTAG UART, the bus fabric, the flash
  and SSRAM controllers, the timer and the PLL are left out. The host side is
  the plain load, start and result ports.
* **Exponents of F-ACOSD.** The forward detector's formulas, as published,
  put the coefficient on X(1) and its complement on X(p+k). With coefficients
  above 1, that gives a threshold below X(1), which can never work. The RTL
  uses the backward detector's form, `X(1)^(1-a) X(p+k)^a`. Two things
  support this:
  * The F table is the B table mirrored, as expected when both detectors end
    on the same sample.
  * The measured false-alarm rate is about 10⁻³, the design value (see below).

  The published text also gives X(p) rather than X(p+k) for the second
  censoring threshold. The general formula, X(p+k), is used.
* **Log table steps.** The source uses steps of about 0.03, 0.1 and 1. This
  RTL uses 1/32, 1/8 and 1, so that addressing is a shift. It uses base 2.
  The banks hold 1340 and 1648 words of 16 bits, which is larger than the
  two small block RAMs of the source. Inputs below 1 are covered at the 1/32
  step; the source table starts at 1.
* **Guard cells.** "Two guard cells" is read as one on each side of the CUT.
* **Block edges.** The window is zero-filled at both ends of a block (not
  specified by the source).
* **Both detectors in parallel.** The source runs both algorithms but keeps a
  single 1×256 result array. `alg_sel` chooses which decisions are stored;
  both appear on the cell outputs.
* **The input memory is written by the host.** The source calls it a ROM into
  which the data set is downloaded. Here it is a RAM with a host write port.
* **Detection results under the source's test conditions are not
  reproduced.** The source reports Pfa = 2·10⁻⁴ at 20 dB and 0 at 30 dB
  signal-to-clutter ratio (SCR), and almost every target found. Here SCR is
  taken as the amplitude ratio of a target to a clutter draw, with
  ln X ~ N(1, 1.1) clutter. Under that model the RTL and the reference model
  agree: Pfa ≈ 0.9–1.2·10⁻³, and only 7–25 % of the targets are detected. The
  source does not define its SCR or its clutter spread closely enough to
  repeat its figure.
* **Timing closure.** Whether the RTL closes timing at 100 MHz on a given
  FPGA has not been checked. The longest path is the multiply-add of
  `log_threshold` followed by a compare.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

`tb/tb_ref_pkg.sv` is the reference model. It is written independently of the
RTL, in real arithmetic:

* log2 of the middle of each table step
* the published decimal coefficients
* the censoring rules applied literally

Each comparison also returns its margin. Decisions closer to a threshold than
8/1024 in log2, which is within the hardware's rounding, are not judged. That
excludes under 0.2 % of the decisions at N = 16 and under 3 % at N = 36.

| testbench | what it shows |
|---|---|
| `tb_acosd_pkg` | coefficient rounding; `log_threshold` against real arithmetic |
| `tb_log_lut` | all 65536 codes on both ports, and the read latency |
| `tb_tap_delay_line` | window contents against a queue model; clear |
| `tb_sorted_list` | 3000 remove/insert updates (many duplicates) against a full sort |
| `tb_sample_mem`, `tb_result_mem` | write, read and latency |
| `tb_b_acosd`, `tb_f_acosd` | 3000 random windows with 0–5 interferers: k, decision, threshold, and latency of exactly 3 + tests clocks |
| `tb_acosd_cfar_top` | end to end at the default size (below) |
| `tb_acosd_n36` | the same end-to-end test with N = 36, p = 24 |
| `tb_acosd_pfa` | 1,000,192 cells per SCR (20 dB and 30 dB), 1 % targets; every decision against the model; Pfa below 2·10⁻³ |

`tb_acosd_cfar_top` runs at the default size:

* It uses two blocks. Each has isolated targets and clusters of 3 to 6
  adjacent strong targets.
* Each block is processed once per `alg_sel` value.
* Per cell it checks both decisions, both k values and both thresholds.
* It checks each cell's clock count and the pass length, and reads back the
  result RAM.
* Each of these must happen at least once: B censoring, censoring of all N−p
  cells, F stopping on an interferer, F accepting all cells, targets from both
  detectors, both `alg_sel` modes, and decided edge cells.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
      rtl/acosd_pkg.sv tb/tb_ref_pkg.sv tb/tb_acosd_cfar_top.sv \
      --top-module tb_acosd_cfar_top
    ./obj_dir/Vtb_acosd_cfar_top

To run another testbench, replace the testbench file and the top module name.
`tb_acosd_pfa` takes about 40 s; the others take a few seconds.

## Files

* `rtl/acosd_pkg.sv`: types, formats, coefficient tables, `log_threshold`
* `rtl/log_lut.sv`: two-bank, two-port logarithm table
* `rtl/tap_delay_line.sv`: the sliding window
* `rtl/sorted_list.sv`: the incremental sorter
* `rtl/b_acosd.sv`: backward censoring detector
* `rtl/f_acosd.sv`: forward censoring detector
* `rtl/sample_mem.sv`: 256 × 16 input memory
* `rtl/result_mem.sv`: 256 × 1 result memory
* `rtl/acosd_cfar_top.sv`: the complete detector and its control sequence
* `tb/`: the testbenches and the reference model

To change the window size, set `N` and `P` to a pair with coefficient tables,
or add tables to `acosd_pkg`. `NCELLS` sets the block length.
