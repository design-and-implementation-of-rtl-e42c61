# GPS / IRNSS signal acquisition block

A satellite navigation receiver cannot track a satellite until it knows,
roughly, two things about its signal: where in the 1 ms, 1023-chip spreading
code the received samples currently are (the *code phase*), and how far the
carrier is shifted by the satellite's motion (the *Doppler*, within about
±10 kHz). This block finds both. It takes one millisecond of complex
baseband samples from an I/Q front end, correlates them against every code
shift of the wanted satellite's Gold code at every Doppler bin of a grid,
picks the strongest cell, decides from the ratio of the two strongest peaks
whether the satellite is really there, and, if it is, refines the Doppler
with a finer frequency search at the found code phase. The results (found or
not, code phase, Doppler) are meant for a tracking stage, which is not part
of this RTL.

Both GPS C/A and IRNSS SPS signals use 1023-chip Gold codes at 1.023 Mchip/s
from the same pair of shift registers, so the same hardware serves both.

The architecture follows a published student design of an IRNSS acquisition
block: a bank of four-input correlators reused over the code period, CORDIC
Doppler wipe-off, a two-pass peak search with a one-chip exclusion range,
the ratio test and the coarse-then-fine Doppler search. That description
gives the structure and the algorithm but almost no numbers. The sampling
rate, widths, step sizes, handshakes and most of the control are this RTL's
own choices; the section "What is this design's own" lists them.

## The search grid and its cost

With `NS` samples per code period (4092 at the default 4.092 MHz, four
samples per chip) and `NBINS` coarse Doppler bins (41: −10 kHz to +10 kHz in
500 Hz steps), the grid has `NS × NBINS` ≈ 168 000 cells. Each cell is a
correlation of `NS` complex samples, so a brute-force search needs about 686
million complex multiply-accumulates. The block does it with one reusable
bank of `4 × N_CORR` = 64 lanes, so one code shift takes
`WORDS = ceil(NS / 64)` = 64 clock cycles, and one coarse bin takes
`NS` cycles of wipe-off plus `NS × WORDS` cycles of correlation:

```
cycles ≈ 1023 (PRN) + NS (code expansion)
       + NBINS × (NS + NS × WORDS)          coarse search
       + NFINE × (NS + WORDS)                fine search, only if acquired
       + under 200 per bin of pipeline drain
```

At the defaults this is about 10.96 million cycles (measured: 10 962 465),
i.e. about 110 ms at a 100 MHz clock. Doubling `N_CORR` halves the
correlation time at the cost of twice the correlators.

## Data flow

```
 front end ──► write_data ──► (sample memory, NS × {I,Q})
                                   │ read one sample per cycle
 acquisition_control ── phase NCO ─┤ angle −2π f n / fs
                                   ▼
                            cordic_rotation  (Doppler wipe-off)
                                   │ one wiped sample per cycle
                                   ▼
 prn_finder ──► code_generator ──► acquire_bank ──► correlator_bank ──► correlator ×2N
   Gold code     NS-sample replica   buffer, windows,    N partial sums
                 + shifted windows   accumulate, I²+Q²   per stream
                                   │ one power per code shift
                                   ▼
                              peak_finder ──► acquisition_control ──► results
```

`irnss_acq_top` wires these together. `acq_pkg` holds the shared constants
and the `gnss_sys_e` type.

### 1. Capture (`write_data`)

A `capture` pulse arms the block; the next `NS` samples with `in_valid`
high (gaps allowed) are stored, one `{I, Q}` word per sample, and
`data_ready` rises. The record is then read once per Doppler bin, so the
front end is only needed for one millisecond.

### 2. Code generation (`prn_finder`, `code_generator`)

`prn_finder` runs the two 10-stage registers G1 = 1 + x³ + x¹⁰ and
G2 = 1 + x² + x³ + x⁶ + x⁸ + x⁹ + x¹⁰ for 1023 cycles. For GPS, G2 starts
all ones and the satellite is chosen by XOR-ing two G2 stages (the standard
phase-selector table for PRN 1–32 is built in). For IRNSS the satellite is
chosen by the G2 start state instead; that table is *not* built in and must
be given on `g2_init` (bit k loads stage k+1). Chips are stored as bits,
1 meaning a −1 chip.

`code_generator` expands the chips to `NS` samples: sample n takes chip
`floor(n × 1023 / NS)`, computed with an exact rational counter, so any
sampling rate with at least one sample per chip works without drift. The
replica is stored once. A code shift is not a rotated copy but a read that
starts at another offset: the window port returns the 64 replica samples from
`win_start`, wrapping around the end of the period.

### 3. Doppler wipe-off (`cordic_rotation`)

For bin frequency f, sample n is rotated by −2π f n / fs. The angle comes
from a 32-bit phase accumulator in the controller. The CORDIC is a 16-stage
pipeline of the usual micro-rotations x' = x − d·y·2⁻ⁱ,
y' = y + d·x·2⁻ⁱ, z' = z − d·atan(2⁻ⁱ), with the gain pre-compensated by
K = 0.607253. A first stage rotates by ±90° when the angle is outside
±90°, because the micro-rotations alone only converge to about ±99.7°.
Angles are binary: 2²⁴ is one turn. The output is rounded to 14 bits. It
takes one sample per cycle and has an 18-cycle latency. The wiped samples go
straight into the correlation buffer.

The original description feeds the CORDIC with I or Q alone (y₀ = 0) to
form the products y·cos θ and y·sin θ. This RTL rotates the complex sample
(I, Q) in one pass, which is the same rotation applied to both components.
Fed with y = 0, the module gives exactly those two products.

### 4. Correlation (`acquire_bank`, `correlator_bank`, `correlator`)

This is the heart of the design and where most of the time goes.

* `correlator` multiplies four samples by four ±1 code values and adds the
  four products.
* `correlator_bank` holds `N_CORR` correlators for I and `N_CORR` for Q.
  Each cycle it takes one window of `4 × N_CORR` samples and the matching
  replica bits and returns `N_CORR` partial sums per stream (registered).
* `acquire_bank` keeps the wiped code period in a buffer of `WORDS` words of
  64 samples. Slots past sample `NS − 1` read as zero, so `NS` need not be a
  multiple of 64. For a code shift τ, word w goes to the bank together with
  the replica window starting at `(64·w − τ) mod NS`. A start
  pointer moves by 64 per word, modulo `NS`, so no divider is needed. The
  partial sums are added, accumulated over the `WORDS` words, and
  `I² + Q²` is output with its τ. Shifts run back to back, one power every
  `WORDS` cycles; the first power appears `WORDS + 4` cycles after `start`.

The correlation computed for shift τ is

```
I(τ) = Σₙ Iw[n] · r[(n − τ) mod NS],   Q(τ) = Σₙ Qw[n] · r[(n − τ) mod NS],
P(τ) = I(τ)² + Q(τ)²
```

where r is the ±1 replica. A signal whose code starts at sample τ₀ therefore
peaks at τ = τ₀, and the reported `code_phase` is that sample index. The
sums are not divided by N, which does not change the peak ratio. The widths
(28-bit sums, 57-bit power) cannot overflow at the default sizes.

### 5. Peak search (`peak_finder`)

Powers arrive one per code shift. They are collected in batches of
`NC` = 64. Each full batch, and the shorter last batch of a bin, is searched
in two passes:

1. the largest power in the batch and its code shift;
2. the largest power whose circular distance from that shift is more than
   one chip (`EXCL` = ceil(fs / 1.023 MHz) = 4 samples). The samples right
   next to a correlation peak are part of the same peak, not a competitor.

Each batch result is merged into the bin's running maximum and second
maximum. A new maximum demotes the old one to second place only if the old
one lies outside the new one's exclusion range; otherwise the larger of the
two seconds is kept. This matches an exhaustive search except for one case:
a value that was discarded for being next to an old maximum, but lies outside
the range of a later, nearby, larger maximum. In that case the second peak
can come out slightly low, which makes the ratio test more lenient.

Two batch buffers alternate: one is searched (2 × 64 + 1 cycles) while the
next fills (64 × 64 cycles), so peak search never stalls correlation. An
assertion flags an overrun if a configuration ever delivered powers faster
than the search can handle them.

### 6. Decision and fine search (`acquisition_control`)

Over the coarse bins the controller keeps the bin with the largest peak,
together with *that bin's own* second peak. It does not use the largest
second peak over all bins. The satellite counts as acquired if

```
peak × 16 ≥ threshold × second        (threshold: 8 bits, 4 fraction bits; 40 = 2.5)
```

If it is acquired, the controller repeats wipe-off and a single-shift
correlation at the found code phase for `NFINE` = 11 frequencies 50 Hz apart,
centred on the coarse estimate (±250 Hz, one coarse step). It reports the
frequency with the highest power as `doppler_hz`. If the test fails, no fine
search is run, `acquired` is 0 and `doppler_hz` repeats the coarse value.

#### Cold and warm start

With no prior knowledge (`warm` = 0, a cold start) all `NBINS` coarse bins
are searched. When a previous measurement already gives an approximate
Doppler, set `warm` = 1 and give its coarse bin on `hint_bin` (bin k is
`IF_HZ − DMAX_HZ + k × COARSE_HZ`; at the defaults k = (f + 10 000) / 500).
Then only that bin and `WARM_SPAN` (default 1) bins either side are searched,
clipped at the ends of the grid. At the defaults the search then takes
3 bins instead of 41: 0.85 million cycles (measured 849 525) instead of
11 million. The result is the same as a cold start if the signal lies
within the searched range. If `hint_bin` lies past the last bin, only the last bin is searched.

### Accuracy

Code phase comes out exact to the sample in all the tests, also with four
satellites in one record. The Doppler estimate is limited by the one
millisecond of coherent integration. The correlation power is only about
3 % lower 100 Hz away from the true frequency, so the 50 Hz fine search
lands within 25–50 Hz for strong signals. For weaker signals among other
satellites it was seen 100 Hz off (still better than the 500 Hz coarse grid).
The ratio test cleanly separates present satellites (peak/second from 11 to
36 in the tests) from absent ones (1.3–1.4).

## Top-level interface (`irnss_acq_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `capture` | in | 1 | pulse: store the next `NS` samples |
| `in_valid`, `in_i`, `in_q` | in | 1, 12, 12 | sample stream (signed I and Q) |
| `data_ready` | out | 1 | a full code period is stored |
| `start` | in | 1 | pulse: start a search; `sys`, `prn`, `g2_init`, `threshold`, `warm`, `hint_bin` are sampled |
| `sys` | in | 1 | `SYS_GPS` or `SYS_IRNSS` |
| `prn` | in | 6 | GPS PRN 1–32 |
| `g2_init` | in | 10 | IRNSS G2 start state |
| `threshold` | in | 8 | minimum peak/second ratio in 1/16 |
| `warm` | in | 1 | 1: warm start around `hint_bin`; 0: search every bin |
| `hint_bin` | in | 8 | coarse bin of the approximate Doppler (warm start only) |
| `busy`, `done` | out | 1 | search running; one-cycle pulse when results are valid |
| `acquired` | out | 1 | ratio test passed |
| `code_phase` | out | clog2(NS) | code phase in samples |
| `coarse_doppler_hz`, `doppler_hz` | out | 32 | coarse and fine Doppler, signed Hz |
| `peak`, `second` | out | 57 | the two powers used in the ratio test |

Sequence: pulse `capture`, stream `NS` samples, then pulse `start` (the
search waits for `data_ready` if needed) and wait for `done`. The results
stay valid until the next `start`. A new search on the same record, for
another satellite, needs only another `start`.
Do not pulse `capture` while a search runs. Assertions in the top flag that,
and any unit being started while it is still busy.

Top parameters: `FS` (4 092 000), `NSAMP` (`FS/1000`), `NCORR` (16),
`NBATCH` (64), `IF_HZ` (0), `DMAX_HZ` (10 000), `COARSE_HZ` (500),
`FINE_HZ` (50), `NFINE` (11), `WARM_SPAN` (1). `NSAMP` must be `FS/1000` and at least 1023.
`IF_HZ` shifts the whole Doppler grid, for front ends that deliver the
signal at a low IF rather than at baseband.

## What follows the original design, and what is this design's own

Taken from the original description:
* the grid search over all code shifts and a ±10 kHz Doppler range;
* the four-multiplier correlator, the bank of them, and its reuse over the
  code period;
* Doppler wipe-off with a 16-iteration CORDIC and K = 0.607253;
* one stored replica read from different offsets instead of rotated copies;
* the batch-wise, two-pass peak search with a one-chip exclusion range,
  overlapped with correlation;
* the global maximum taken with the second maximum of its own bin;
* the ratio test, and the fine search at a fixed code phase;
* the two ways to start: with no prior knowledge, or with an approximate
  Doppler;
* GPS/IRNSS use, I/Q input;
* the module split (capture, PRN, code expansion, CORDIC, bank, peak search,
  control).

Chosen here, because the original leaves them open:
* 4.092 MHz sampling;
* 12-bit input and 14-bit wiped samples;
* 16 correlators per bank;
* 500 Hz coarse steps, and 11 fine steps of 50 Hz;
* batches of 64;
* the threshold format;
* the Doppler hint given as a bin index, and a warm search of ±1 bin;
* baseband input (IF = 0) by default;
* the CORDIC's quadrant pre-rotation and angle format;
* the complex (I and Q together) rotation;
* the batch merge rule;
* all handshakes and pipeline timing;
* the replica stored as a register vector;
* the GPS and IRNSS code generator details (from the public signal
  specifications);
* the IRNSS start states supplied from outside.

Known limits:
* Coherent integration is exactly one code period. There is no
  non-coherent accumulation over several milliseconds, and no handling of a
  navigation-data bit edge inside the record.
* The IRNSS G2 start-state table is not built in.
* The second-peak merge can differ from an exhaustive search in the corner
  case described above.
* Only one satellite is searched at a time.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_correlator` | sums against direct arithmetic, including extreme values |
| `tb_correlator_bank` | partial sums and the one-cycle latency, with gaps |
| `tb_cordic_rotation` | 1000 rotations against floating point (±3 LSB), all quadrants, 18-cycle latency |
| `tb_write_data` | capture with gaps, ready timing, read-back, re-capture |
| `tb_prn_finder` | GPS PRN 1–32: first 10 chips against the published octal values, all chips against an independent model; IRNSS-style start states |
| `tb_code_generator` | expansion at 4 and at 2.44 samples per chip, wrapping windows, timing |
| `tb_acquire_bank` | every power against a direct correlation, wrap, padding, throughput and latency |
| `tb_peak_finder` | exact max / second with exclusion, peaks at batch edges and at the wrap, overlap |
| `tb_acquisition_control` | handshakes, angle sequence per bin, write-back, best-bin bookkeeping, ratio test both ways, fine search, warm starts in the middle and at both ends of the grid |
| `tb_irnss_acq_top` | end to end at 2.046 MHz and ±2 kHz: GPS acquisition with the power checked against floating point, rejection of a wrong PRN, an IRNSS-style code with negative Doppler and code phase at the wrap, and the same record again as a warm start (3 bins searched, same result). It also counts the design's mechanisms (pre-rotation, window wrap, padding, overlap, partial batch, exclusion, maximum replacement, fine search, both decisions, warm start) and fails if any never happens. |
| `tb_irnss_acq_multisat` | cold-start workload: one record with four GPS satellites (PRN 3, 11, 22, 30) at different code phases, Dopplers over ±5 kHz and amplitudes; each is acquired at its own code phase, and two absent PRNs are rejected |
| `tb_irnss_acq_full` | one full search at the default parameters (41 bins, 4092 shifts): code phase, coarse and fine Doppler, peak power and exact cycle budget; then a warm start on the same record (3 bins, 849 525 cycles, same result) |

`tb/gnss_code_model.sv` is the testbench's own Gold code model. It is written
independently of `prn_finder` and shared by several testbenches.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_irnss_acq_top \
    -y rtl -y tb +libext+.sv rtl/acq_pkg.sv tb/gnss_code_model.sv \
    tb/tb_irnss_acq_top.sv -Mdir obj_top
./obj_top/Vtb_irnss_acq_top
```

The end-to-end test takes a few seconds, the multi-satellite test about
20 s and the full-size one about 17 s (11.8 million cycles).
