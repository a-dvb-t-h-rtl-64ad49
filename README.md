# DVB-T/H inner baseband transceiver

This RTL implements the inner baseband of a DVB-T/H link for mobile
reception. The transmitter turns bits into OFDM symbols with pilots and a
cyclic prefix. The receiver acquires such a signal with no prior
knowledge: FFT mode (2K/4K/8K), guard-interval ratio (1/32 to 1/4), symbol
timing, and fractional and integer carrier offset. It then estimates the
channel for every carrier and returns hard-decided bits.

The receiver's main idea is its channel estimator, built for fast-changing
channels. DVB-T sends a scattered pilot on every twelfth carrier, and the
pattern moves by three carriers from one symbol to the next. Any carrier
k = 3j ("column j") therefore sees a pilot only every fourth symbol. The
estimator does two things:

* It **predicts each column forward in time** from its last two pilot
  observations (linear extrapolation).
* It **interpolates between columns in frequency** with a least-squares
  parabola.

Both steps reduce to constant weights, made of shifts and adds. The
estimator needs no data buffer, only two pilot memories.

Everything is single-clock, synchronous, with an active-low asynchronous
reset. Samples and cells are 16-bit two's-complement I/Q, packed as
`cplx_t` = {re, im} (package `dvb_pkg`). A cell of unit amplitude has the
value `UNIT` = 1024.

## Carrier and pilot conventions

* Used carriers: K = 1705 / 3409 / 6817 for N = 2048 / 4096 / 8192.
  Carrier k goes to FFT bin (k − (K−1)/2) mod N, so the spectrum is
  centred on DC.
* Scattered pilots are at k mod 12 = 3·(symbol index mod 4).
* Continual pilots use the 45-position 2K list of DVB-T in every mode.
  All 45 positions are multiples of 3, so they lie on columns.
* Pilots are real, ±4/3·UNIT = ±1365. The sign is bit w_k of the DVB-T
  reference PRBS, x^11 + x^2 + 1 started from all ones, advanced once per
  used carrier. w = 1 means negative.
* QAM cells, per axis: the first bit is the sign (1 = negative); the next
  bits are the Gray-coded level. Even bit positions drive I and odd ones
  drive Q.
  - Level spacings are UNIT/√2, UNIT/√10 and UNIT/√42 (724, 324 and 158)
    for QPSK, 16-QAM and 64-QAM, which gives unit mean power.

## Transmitter (`dvbt_tx`)

`qam_mapper` → `frame_adapt` → `fft_core` (inverse) → `gi_insert`.

* **Build.** `frame_adapt` walks k = 0 … N−1. For each carrier it writes
  either a pilot or the next mapped data cell to the carrier's bin, and
  zero to unused bins. The mapper has one cycle of latency, so a data
  request is answered one cycle later.
* **IFFT.** The symbol is transformed in place.
* **Emit.** `gi_insert` reads samples N−G … N−1, then 0 … N−1, on a
  valid/ready stream. `out_first` marks the first guard sample.

The symbol counter sets the scattered-pilot phase. Mode, GI and
constellation are taken at the start of each symbol.

## Receiver (`dvbt_rx`)

### Acquisition: `delay_corr` and `sig_detect`

`delay_corr` keeps, over a window of W samples:

* P(n) = Σ r(n−k−N)·conj(r(n−k))
* E(n) = Σ |r(n−k)|²

Inputs are cut to 12 bits. Both sums are recursive (add the newest
product, subtract the one W samples back). Two circular buffers hold the
delayed inputs and the products. The normalised correlation |P|/E never
needs a divider: the "peak" test |c| > 0.5 is computed as 4|P|² > E².

`sig_detect` works in three states:

1. **SCAN.** It tries N = 2K, 4K, 8K in turn, with the smallest window
   W = N/32.
   - It measures the distance between rising edges of the peak flag.
     Edges closer than N/2 are ignored.
   - It matches that distance to N + N/32 … N + N/4, within ±N/128.
   - If nothing matches within a dwell time, it moves to the next N and
     pulses `scan_next`.
2. **TIME.** With N and G known, the window becomes W = G. The maximum of
   |P|² over one symbol period marks the symbol end.
   - The angle of P there, from a vectoring CORDIC, gives the fractional
     carrier offset.
   - The per-sample de-rotation increment is −angle/N, where 2^32 is a
     full turn.
3. **TRACK.** Each following symbol end is searched within ±N/128 of
   where it is expected and reported as `peak_idx`.
   - Four symbols in a row without a peak return to SCAN and clear
     `detected`.
   - Until `detected`, the rest of the receiver stays idle.

### Time domain: `cfo_derot` and `fft_window`

`cfo_derot` is an NCO and a rotation CORDIC. Its increment is the
fractional-offset increment minus icfo·2^32/N. The integer offset is
therefore also removed in the time domain, from the symbol after it was
measured.

`fft_window` places the next window at peak + 1 + G − N/128. That is the
first useful sample, moved early by a quarter of the smallest guard
interval, so a slightly late peak still gives a window inside the guard.

* Windows then repeat every N + G samples without further help.
* Multipath makes the peak jitter by a few samples. To ignore that, the
  schedule moves only when two successive peaks agree on a new position
  more than N/512 samples away:
  - A later position drops samples and pulses `slip_drop`.
  - An earlier position adds them again and pulses `slip_add`.
  - The first outlying peak pulses `suspect`.
* The window is stored in an N-word buffer. The consumer copies it out
  and acknowledges with `win_take`.
* The next window overwrites the buffer from address 0 at the input rate.
  A copy that starts at `win_ready` and reads one word per cycle
  therefore stays ahead, even with the shortest guard interval.
* A window that completes before the previous one was taken pulses
  `overrun`.

### Frequency domain, one symbol at a time

The `dvbt_rx` state machine runs these steps in order:

| step | work | cycles (2K) |
|------|------|-------------|
| COPY | window buffer → FFT memory | N = 2048 |
| FFT  | forward transform | log2N·N/2 = 11264 |
| ICFO | `icfo_est`, two passes over the spectrum | 31·45 + K/3 ≈ 1970 |
| CE   | carriers k = 0 … K−1 through `chan_est` → `feq` → `demapper` | K + 10 ≈ 1715 |

`icfo_est` does two passes:

* **Integer offset.** For every shift s = −15 … +15 it sums |R|² over the
  continual-pilot bins moved by s. Boosted pilots make the correct shift
  the strongest.
* **Scattered-pilot phase.** It sums the power of the columns in four
  groups, by j mod 4. The strongest group is the phase of the symbol.

A non-zero integer estimate has three effects:

* It is added to the de-rotator.
* The next two symbols are not used for estimation, because they were at
  least partly collected before the correction took effect.
* The channel estimator restarts.

A confirmed or suspected window slip also restarts the channel estimator,
because it changes the phase slope across the carriers.

## Channel estimator (`chan_est`)

Carriers arrive in order k = 0 … K−1. Every third carrier is a column
k = 3j. Each symbol goes through three steps.

**1. Pilot estimate.** At a pilot the estimate is H = ±¾·R. ¾ is
(R >> 1) + (R >> 2). The sign is the PRBS bit w_k, and 4/3 · 3/4 = 1
gives H in UNIT scale. A scattered pilot also updates the column's two
pilot memories: `prev ← latest`, `latest ← H`.

**2. Time prediction for columns without a pilot this symbol.** Let the
column's last scattered pilot be d symbols old (d = 1, 2, 3). Its pilot
before that is then d + 4 symbols old. The straight line through both
points gives

    H = (1 + d/4)·latest − (d/4)·prev = latest + (d/4)·(latest − prev)

* d = 1, 2 and 3 give (5/4, −1/4), (6/4, −2/4) and (7/4, −3/4).
* d comes from the symbol's pilot phase and the column index mod 4:
  d = (phase − j) mod 4.
* The multiply is `latest + (diff·d) >> 2`, where diff·d is diff, 2·diff
  or 2·diff + diff.
* Until eight symbols are seen, `prev` is not valid yet, so the latest
  pilot is held instead.
* Columns with a continual pilot use that pilot directly.

**3. Frequency interpolation for the two carriers between columns j and
j+1.** Fit a parabola by least squares through the four columns j−1 … j+2,
at offsets −3, 0, 3, 6. Evaluated at offsets 1 and 2, it reduces to fixed
weights. In Q10 (sum 1024):

| position | weights on columns j−1, j, j+1, j+2 |
|----------|-------------------------------------|
| k = 3j+1 | −6, 586, 552, −108 |
| k = 3j+2 | −108, 552, 586, −6 |

At the band edges the four outermost columns are used instead:

* Left edge, offsets 1 and 2 from column 0 over columns 0…3:
  (643, 347, 108, −74) and (370, 483, 313, −142).
* Right edge: the mirror images.

**Hardware.** The interpolator sees an eight-entry column ring, and the
received cells pass through a nine-carrier delay line. The output is
therefore the input delayed by nine carriers, with its channel estimate
and a data flag. After the last carrier, nine flush steps run on their
own.

Memories are two pilot buffers of one word per column: 2273 words, enough
for 8K. No data buffer is needed.

**Status outputs.**

* `est_ok` rises once four symbols have passed since the last restart, so
  that every column has held a pilot.
* `pred_used` and `interp_used` pulse whenever the two mechanisms act.

## Equaliser and de-mapper (`feq`, `demapper`)

There is no division. `feq` forms:

* Z = R·conj(H)
* G = |H|², which is 2^20 for a unit channel

Z/G is the transmitted cell in UNIT scale. `demapper` therefore decides
each axis by:

* the sign of Z;
* comparing |Z|·UNIT with m·(2·level spacing)·G, for m = 1, 2, 3.

It then Gray-codes the level. Pilot carriers are dropped. `sym_last`
marks the end of a symbol.

## FFT (`fft_core`)

The FFT is an in-place radix-2 decimation-in-time transform over one N-word
memory. It runs one butterfly per cycle, and N is set at run time
(`log2n` = 11, 12 or 13).

* The load is at bit-reversed addresses. After the transform the memory
  is in natural order.
* Twiddles are 16-bit (Q14), computed at elaboration from cos/sin.
  Smaller sizes sub-sample the table.
* Internal words are 28 bits with 4 fractional guard bits. Stages 0, 2,
  4 … halve their outputs, so the result is DFT/2^ceil(log2N/2).
* The inverse is conj(FFT(conj(x))).
* `done` comes log2N·N/2 + 1 cycles after `start`. Reads have one cycle
  of latency.

## Throughput and sizes

A 2K symbol takes about 17.0k receiver cycles, and an 8K symbol about
72k. That is 7 to 8.5 clocks per input sample in every mode. At the
standard 64/7 MHz sample rate the receiver therefore needs a clock of
about 78 MHz. A receiver meant to run at 36.75 MHz needs a faster FFT
(radix-4, or two butterflies per cycle) and overlap of the COPY and CE
steps with the FFT.

Memories at the default sizes:

* FFT memory, 8192 × 56 bits
* window buffer, 8192 × 32
* correlator delay line, 8192 × 24
* correlator product line, 2048 × 75 (P re, P im and power)
* two pilot buffers, 2273 × 32
* transmitter FFT memory, 8192 × 56

## Departures from the reference description

* **FFT rate.** See above: the radix-2 core is about twice too slow for
  real time at 36.75 MHz.
* **Continual pilots.** The 2K list of 45 is used in every mode; 4K and
  8K would carry 89 and 177. The transmitter and receiver agree, so
  the link works. A standard 4K/8K signal would still be estimated,
  using only the 45 listed positions for the integer offset.
* **TPS.** TPS pilots are not inserted and not decoded. Their carriers
  carry data.
* **Prediction coefficients.** The coefficients are those of straight-line
  extrapolation. The reference description prints (5/4, −1/4) for
  d = 3 and (7/4, −3/4) for d = 1, the reverse of what extrapolation
  from its own symbol indices gives.
* **Pilot buffer size.** The buffers hold 2273 words (every column of
  8K). The reference counts 2096, which leaves out the 177 continual-pilot
  columns.
* **Own choices** where the description gives only the function:
  - the mode/GI scan method;
  - the dead band and two-peak confirmation of the window controller;
  - the integer-offset feedback into the NCO;
  - the scattered-pilot phase detector;
  - the four-column regression window;
  - the divider-free equaliser;
  - CORDIC for the correlation angle and the de-rotation;
  - restarting the channel estimator on a suspected slip (see the
    measured bit error ratios under Simulation);
  - all word lengths.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one:

* prints `TB_RESULT checks=<n> failures=<m>`;
* has a cycle-count watchdog;
* uses only `$urandom` and real arithmetic for its reference models.

Build one with plain Verilator, for example:

    verilator --binary --timing -Wno-fatal --top-module tb_chan_est \
        rtl/dvb_pkg.sv rtl/cordic_pkg.sv $(ls rtl/*.sv | grep -v pkg) tb/tb_chan_est.sv
    ./obj_dir/Vtb_chan_est

| testbench | what it checks |
|-----------|----------------|
| `tb_qam_mapper` | all 64 bit patterns × 3 constellations against the level table |
| `tb_demapper` | random cells through random complex gains and noise, bits back |
| `tb_feq` | exact Z and G on random full-range values |
| `tb_cfo_derot` | rotation of a constant against exp(j·n·inc), saturation |
| `tb_gi_insert` | guard/useful order for N up to 8K with a random `out_ready` |
| `tb_delay_corr` | exact P and E against direct sums, `out_full` timing |
| `tb_sig_detect` | 2K GI 1/4 and 8K GI 1/32 (after two scan steps), FCFO within 3 %, peak positions |
| `tb_fft_window` | window contents, suspect / drop / add sequence, overrun |
| `tb_fft_core` | 2K forward and 4K inverse against a direct DFT, cycle count |
| `tb_icfo_est` | shifts −15 … 15 in all modes and the four pilot phases |
| `tb_chan_est` | rotating two-path channel: estimate error, prediction and interpolation, restart |
| `tb_frame_adapt` | every bin of 2K/4K/8K symbols, with mapper stalls |
| `tb_dvbt_tx` | four 2K symbols: guard copy, and a direct DFT giving back pilots and data |
| `tb_dvbt_rx` | 2K GI 1/4 64-QAM through an offset of −3.4 carriers and an echo: bit-exact data |
| `tb_dvbt_top` | end to end; see below |
| `tb_wl_fig5_2k` | 2K GI 1/32 64-QAM, 16 kHz offset, 20 ppm clock offset, static six-path channel |
| `tb_wl_mobile_2k_gi4` | 2K GI 1/4 QPSK through a fading typical-urban channel at 193 Hz Doppler |
| `tb_wl_mobile_2k_gi8` | 2K GI 1/8 QPSK through a fading typical-urban channel at 300 Hz Doppler |

The three `tb_wl_` benches add no noise, so the bit error ratio they
measure is the receiver's own floor. It is well above the reference
results:

| testbench | bit error ratio measured | bound checked |
|-----------|--------------------------|---------------|
| `tb_wl_fig5_2k` | 2444 / 110088 (2.2 %) | 5 % |
| `tb_wl_mobile_2k_gi4` | 1151 / 27522 (4.2 %) | 10 % |
| `tb_wl_mobile_2k_gi8` | 3194 / 42812 (7.5 %) | 10 % |

The main cause is that an outlying correlation peak, even one that is
never confirmed, restarts the channel estimator. It then gives no
estimate for four symbols and uses held pilots until the eighth. Under a
clock offset or fading those pilots go stale. The bounds only show that the receiver stays locked and
decodes; they are not the quasi-error-free target.

`tb_dvbt_top` runs the full-size top with no parameter changes. Its
setup:

* 4K mode, GI 1/8, 16-QAM, 38 symbols.
* A carrier offset of 2.3 subcarriers.
* A two-path channel with an echo of 0.3·e^j at 3 samples.
* Leading noise.
* The 24-sample clock slips below.

It checks the detected mode and GI, both offset estimates, and every
de-mapped bit of the symbols where the estimator was filled. It also
requires each mechanism to happen at least once:

* a mode scan step;
* acquisition;
* a sample add;
* a sample drop;
* time prediction;
* frequency interpolation.

The slips are 24 samples deleted at the end of one symbol and one sample
repeated 24 times later. The test runs in about two seconds.
