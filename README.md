# Iterative-threshold frequency-domain anti-jamming front end

A spread-spectrum receiver tolerates narrowband interference only up to its
spreading gain. Beyond that, the interference has to be removed before
despreading. This design does that in the frequency domain. Each block of
received samples is windowed and transformed with an FFT. Every frequency bin
whose amplitude is too large for a noise-like spread-spectrum signal is cut
down. The spectrum is then transformed back.

The key question is what "too large" means. The threshold is four times the
mean bin amplitude. Strong interference inflates that mean, so a single pass
leaves much of it behind. The threshold is therefore **iterated**. After one
pass has clamped the worst bins, the mean is recomputed from the clamped
spectrum, which gives a lower threshold for the next pass. Three passes are
used. The RTL offers two hardware structures for these passes: a **pipeline**
of three identical units, and an **iterative** unit that re-reads one frame
three times at three times the sample clock. Both give bit-identical results.

The algorithm, the block structure, the frame length of 512, K = 4, the three
iterations and both IJAS structures follow the published design "A Novel
Iterative Threshold for Anti-jamming Algorithm and Its Implementation on
FPGA". Number formats, cycle timing, the window coefficients, the amplitude
computation, stream alignment and all interface details are this
implementation's own. They are flagged as such below and in each file's
header.

## Signal chain

```
              +-> add_window --> [FFT] -> amp_unit -> IJAS -> [IFFT] --+
in_data ------+                                                         +-> synthesis_output -> out_data
              +-> half_frame_delay -> add_window --> [FFT] -> amp_unit -> IJAS -> [IFFT] --+
```

* **Two overlapped branches.** Branch A cuts the input into frames starting
  at samples 0, 512, 1024, … Branch B sees the input through a 256-sample
  delay (`half_frame_delay`), so its frames start half a frame later. Each
  input sample therefore lies in two frames, one per branch.
* **Window** (`add_window`). Each frame is multiplied by a periodic Hamming
  window, w(n) = 0.54 − 0.46·cos(2πn/512). The window reduces spectral
  leakage, so a narrowband interferer stays in few bins. The coefficients are
  round(32768·w(n)) in unsigned Q1.15, held in `rtl/hamming_window_512.hex`.
  The product is shifted right by 15 bits (arithmetic shift).
* **FFT / IFFT.** These are external cores: a 512-point transform in scaled
  mode, natural order, with frames back to back. `fdaj_top` hands each
  branch's windowed frames out on `win_*` and takes the spectrum back on
  `fft_*`. It hands the suppressed spectrum out on `ijas_*` and takes the
  IFFT's real part back on `ifft_*`. Their latency is free, but both branches
  must use identical cores.
* **Amplitude** (`amp_unit`). Computes |R(n)| = ⌊√(re² + im²)⌋ exactly:
  a squaring stage, then a 16-step integer square root. Latency is 2 cycles.
  The amplitude travels with the sample as a 48-bit `fsample_t`
  (re, im, amp).
* **IJAS** (interference judgment and suppression). Either
  `ijas_pipeline` or `ijas_iterative`, chosen by `fdaj_top`'s `SCHEME`
  parameter; see below.
* **Overlap-add** (`synthesis_output`). Position b of branch B's output
  stream and position b − 256 of branch A's hold the same input time. Branch
  A is queued in a FIFO that starts with 256 implicit zeros, and each branch B
  sample is added to the head. Two periodic Hamming windows offset by half a
  frame sum to 1.08 everywhere, so the output is the processed input × 1.08.
  The sum is not rescaled and has 17 bits. The 1024-word FIFO also absorbs
  the bursty output of the iterative scheme. Sticky `overflow` and
  `underflow` flags report misaligned branches.

## The threshold and its iteration

For a frame of N = 512 bins with amplitudes a(n):

```
TH_1     = 4 · (Σ a(n)) / 512                 = (Σ a(n)) >> 7
a_1(n)   = min(a(n), TH_1)      (bins with a(n) >= TH_1 become (TH_1, 0))
TH_2     = (Σ a_1(n)) >> 7
a_2(n)   = min(a(n), TH_2)
TH_3     = (Σ a_2(n)) >> 7
output   = (TH_3, 0) if a(n) >= TH_3, else the original bin
```

* **Why K = 4.** Without interference, the bin amplitudes of noise plus a
  spread-spectrum signal are Rayleigh distributed. A threshold of K times
  their mean keeps 54 %, 96 %, 99.9 % and ≈100 % of the bins for K = 1, 2,
  3 and 4. K = 4 loses no valid signal. With N = 512 it also turns
  K·mean into a 7-bit shift.
* **Thresholds only fall.** Clamping can only lower the sum, so
  TH_1 ≥ TH_2 ≥ TH_3. A bin below TH_3 was therefore never clamped and leaves
  unchanged. A bin at or above TH_3 leaves as (TH_3, 0).
* **Clamping, not zeroing.** A suppressed bin keeps the threshold amplitude
  rather than being set to zero. The bin's phase is lost (imaginary part 0).
  This is the rule of the design, and it is reproduced as given.
* **Comparison.** "Interfered" means a(n) ≥ TH, including equality. This
  follows the published hardware description. Its algorithm equations use a
  strict ">" instead. The two differ only for a bin exactly at the
  threshold, which then becomes (TH, 0) instead of keeping its phase.
* **Saturation.** TH can exceed +32767 when bins are near full scale. The
  real part of a clamped bin is then saturated to 32767. The amplitude used
  in the following sums keeps the exact TH.

## IJAS, pipeline scheme (`ijas_pipeline`, default)

Three processing units (`ijas_pu`) are chained. Each unit performs one pass
and holds these parts:

* **RAM** (`sample_ram`): 512 × 48 bits.
* **Accumulation unit** (`ijas_au`): sums the amplitudes while the frame is
  written.
* **Threshold unit** (`ijas_tcu`): forms TH = SUM >> 7 when the frame is
  complete.
* **Clamping unit** (`ijas_icu`): judges and clamps each sample as the frame
  is read back. A clamped sample's amplitude becomes TH, so the next unit's
  sum is the sum of a_1(n).

Each unit has a single 512-word RAM. Reading starts in the cycle after a
frame's last write, which is the first cycle the next frame can write
address 0. The read pointer then moves one address per clock and never falls
behind the write pointer. The RAM returns old data on a same-address
read/write, so one frame is read while the next is written into the same
RAM.

* Throughput: one sample per clock, indefinitely.
* Latency: a frame's first output sample leaves 3 × (512 + 2) = 1542 clocks
  after its first input sample (at one sample per clock). Each unit must see
  a whole frame before it can clamp the first sample.
* Frame boundaries are counted from reset, with no frame-start input. The
  stream must start frame-aligned and never lose a sample.

## IJAS, iterative scheme (`ijas_iterative`)

This scheme uses one pair of RAMs instead of a RAM per pass, at the price of
a faster clock.

* **Input side.** The data input selection unit (`ijas_disu`) writes frames
  alternately into RAM1 and RAM2 (ping-pong). The accumulation unit forms
  SUM_1 meanwhile.
* **Hand-over.** The data processing selection unit (`ijas_dpsu`) stores
  SUM_1 per bank and keeps a "ready" flag per bank. It also multiplexes the
  two RAMs' read data.
* **Processing side.** While one RAM fills, the other is read three times
  in a row, one sample per clock:
  1. **Pass 1.** The comparison unit (`ijas_cu`) compares a(n) with TH_1.
     The flag register (`ijas_fr`, 512 bits) records FR[n] = (a(n) ≥ TH_1).
     The sum modification unit (`ijas_smu`) accumulates
     RSUM += a(n) − TH_1 for each such bin. At the pass's last sample it
     forms SUM_2 = SUM_1 − RSUM and TH_2 = SUM_2 >> 7.
  2. **Pass 2.** Compare with TH_2. A bin with a(n) ≥ TH_2 that was already
     clamped (FR[n] = 1) adds TH_1 − TH_2 to RSUM. A bin that was not adds
     a(n) − TH_2. FR is updated. The pass ends with SUM_3 and TH_3.
  3. **Pass 3.** Compare with TH_3 and send (TH_3, 0) or the original sample
     to the IFFT.

The hardest point to see is why this matches the pipeline without ever
writing clamped samples back. After pass i, SUM_{i+1} must equal
Σ min(a(n), TH_i). The flag tells the unit what a bin currently contributes
to that sum. A flagged bin contributes TH_{i−1}. An unflagged bin
contributes a(n). Lowering the threshold to TH_i therefore removes
TH_{i−1} − TH_i or a(n) − TH_i, which is exactly what RSUM collects. For more
than three iterations (`NUM_ITER` > 3), every middle pass uses the pass-2
rule.

Clocking and timing:

* A single clock, the processing clock f_s, is used. Input samples are
  marked by `in_valid` and may arrive at most once every `NUM_ITER` clocks
  on average (f_s ≥ 3·f_in).
* The passes run back to back. The next frame's processing starts in the
  cycle after the previous frame's last read, so the unit keeps up exactly
  at f_s = 3·f_in.
* A sticky `overrun` flag and an assertion report a bank refilled before it
  was taken.
* A frame's 512 output samples leave on consecutive clocks. The first leaves
  2·512 + 5 = 1029 clocks after the frame's last input sample.

## Choosing a scheme

|                          | pipeline                 | iterative                                 |
|--------------------------|--------------------------|-------------------------------------------|
| frame RAM per branch     | 3 × 512 × 48 bit         | 2 × 512 × 48 bit + 512 flag bits          |
| clock                    | = sample rate            | ≥ 3 × sample rate                         |
| output                   | steady stream            | bursts of 512 at clock rate               |
| latency (to first output)| 1542 clocks from first input | 1029 fast clocks after the last input |
| more iterations cost     | one more PU each         | a faster clock                            |

In the pipeline scheme, more iterations cost only more storage. In the
iterative scheme they cost clock rate. The pipeline suits many iterations;
the iterative scheme suits few iterations on a tight RAM budget.

## Interfaces and formats

`fdaj_pkg` holds the shared types:

* `data_t`: 16-bit signed sample or re/im.
* `amp_t`: 16-bit unsigned amplitude.
* `th_t`: 18-bit threshold. This width is enough for K ≤ 4.
* `cplx_t`: {re, im}.
* `fsample_t`: {cplx_t, amp}.
* `ijas_scheme_e`: the scheme selector.

Stream and reset conventions:

* Every stream is a valid strobe plus data, at most one item per clock.
  There is no back-pressure.
* The reset is asynchronous and active low (`rst_n`).

`fdaj_top` parameters:

| parameter  | default           | meaning                                          |
|------------|-------------------|--------------------------------------------------|
| `N`        | 512               | frame / window / RAM length (power of two)       |
| `K`        | 4                 | threshold coefficient (power of two, ≤ 4)        |
| `NUM_ITER` | 3                 | judgment/suppression passes                      |
| `SCHEME`   | `SCHEME_PIPELINE` | or `SCHEME_ITERATIVE`                            |

The window ROM file holds 512 entries. A different `N` needs a matching
table, generated from the formula above.

`fdaj_top` status outputs:

* `clamp_a` and `clamp_b` pulse with every output bin judged interfered.
* `th_first_*` and `th_last_*` show TH_1 and the final threshold of the
  frame in process.
* `overrun`, `synth_overflow` and `synth_underflow` report error conditions.

## Where this departs from the published design

* **Latency.** The published comparison quotes 1024 clocks from first input
  to first output for the pipeline scheme and 512 for the iterative one. No
  three-pass implementation can reach those figures. Every pass needs the
  complete frame sum before it may clamp its first bin, so three chained
  passes take at least 3 × 512 clocks. This RTL takes 1542 clocks (pipeline),
  and 3·511 + 1029 fast clocks at the minimum f_s (iterative).
* **One clock domain.** The iterative scheme is specified with a separate
  FFT clock f_in and IJAS clock f_s. Here the whole chain runs on one clock
  with sample strobes. In an f_s system the FFT side would either run on a
  clock enable or need a clock-domain crossing.
* **Own choices.** These are not given by the design: the amplitude
  computation, the window coefficients and format, all widths and the
  saturation rule, the use of only the IFFT's real part, the unscaled
  overlap-add, and the FIFO alignment of the two branches.
* **Not included.** The FFT/IFFT cores are not part of this RTL. Neither is
  any adaptive choice of the iteration count, which the design mentions only
  as future work.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each
compares the module against values computed independently in the testbench,
prints `TB_RESULT checks=… failures=…` and has a watchdog. Reference models
live in `tb/tb_ref_pkg.sv`: an exact integer square root, the window formula,
and the plain multi-pass threshold algorithm that recomputes the full mean
each pass.

The end-to-end testbenches are built around `tb/fdaj_harness.sv`. It
contains a behavioural DFT/IDFT model standing in for the cores
(`tb/fft_model.sv`, FFT scaled by 1/16, IFFT by 1/32). The stimulus is as
follows:

* a ±100 chip sequence;
* Gaussian-like noise with σ = 1000 (SNR −20 dB);
* five tones at 15.48 MHz ± 0.8 MHz for a 62 MHz sample rate, 2000 each
  (signal-to-interference −30 dB over about 2 MHz).

The harness then checks every sample at every stage bit-exactly: both
windows, every IJAS output bin with its clamp flag and threshold, and every
overlap-added output. It also checks the IJAS latency, and that clamping,
threshold lowering, two-branch addition and the half-frame lead-in all
occur. Finally, the output must carry less than half the input power and a
clearly higher correlation with the chip sequence.

| testbench             | what                                                           |
|-----------------------|----------------------------------------------------------------|
| `tb_fdaj_top`         | whole chain at default parameters (pipeline), 16 frames        |
| `tb_fdaj_top_iter`    | whole chain, iterative scheme, input every third clock         |
| `tb_fdaj_iterations`  | same input with 1 and with 3 iterations; 3 must suppress more  |
| `tb_ijas_depth`       | both IJAS schemes with 1, 2, 4 and 5 iterations against the reference |
| `tb_ijas_pipeline`, `tb_ijas_iterative` | both schemes against the reference, with latency; the iterative one runs at exactly f_s = 3 f_in |
| others                | unit tests of each block                                       |

Typical result with the fixed stimulus: one pass leaves 23 % of the input
power, three passes 18 %. The chip correlation rises from 1.5 (input) to 5.2
after one pass and 6.0 after three.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fdaj_top rtl/fdaj_pkg.sv tb/tb_ref_pkg.sv tb/tb_fdaj_top.sv
./obj_dir/Vtb_fdaj_top
```

Run from the repository root, because the window ROM is loaded from
`rtl/hamming_window_512.hex`. Any other testbench runs the same way with its
name.

## Files

* `rtl/fdaj_pkg.sv`: types and constants.
* `rtl/fdaj_top.sv`: the chain.
* `rtl/half_frame_delay.sv`, `rtl/add_window.sv` (+ `hamming_window_512.hex`),
  `rtl/amp_unit.sv`, `rtl/synthesis_output.sv`: time-domain and amplitude
  stages.
* `rtl/ijas_pipeline.sv`, `rtl/ijas_pu.sv`, `rtl/ijas_au.sv`,
  `rtl/ijas_tcu.sv`, `rtl/ijas_icu.sv`, `rtl/sample_ram.sv`: pipeline scheme.
  `ijas_au` and `sample_ram` are shared with the iterative scheme.
* `rtl/ijas_iterative.sv`, `rtl/ijas_disu.sv`, `rtl/ijas_dpsu.sv`,
  `rtl/ijas_cu.sv`, `rtl/ijas_fr.sv`, `rtl/ijas_smu.sv`: iterative scheme.
* `tb/`: testbenches, reference package, FFT model, harness.
