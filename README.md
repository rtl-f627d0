# DVB-T synchronisation back end with a memory-less integer-CFO search

A DVB-T receiver has to recover three offsets before it can demodulate:
- where each OFDM symbol starts;
- how far the carrier frequency is off, both in whole carrier spacings and in a fraction of one;
- how far the ADC clock is off.

This RTL is the digital back end that finds and removes all three for 2k mode (2048-point FFT, 1705 carriers). It takes real samples from a free-running ADC at 36.28 MHz, at a 4.57 MHz intermediate frequency. It hands the FFT a correctly timed, frequency-corrected window. It then uses the FFT output to measure the remaining offsets, to find which scattered-pilot pattern is in use, and to estimate and equalize the channel.

The centrepiece is the integer carrier-offset estimator (`joint_est`). A textbook integer-CFO search correlates each symbol with a stored copy of the one before it. That costs a whole symbol of memory, and each sample is read many times. This estimator keeps only one sign bit per real and imaginary part of the previous symbol. It correlates only at 12 continual pilots chosen so that their search windows never overlap. As a result, each FFT output is used once, in order, with no multiplier. Once the integer offset is known, the same memory and the same CORDIC are reused to track the remaining carrier offset and the sampling offset.

## Signal path

```
 ADC 10b @36.28 MHz
   │
   ▼
 ddc ─────────── CORDIC mixer at 4.57 MHz, integrate-and-dump ÷4  → 9.07 MS/s complex
   │
   ▼
 interpolator ── resample to 64/7 MS/s; copies (or drops) a sample when its phase wraps
   │                 ▲ step = NOM_STEP + SCO loop
   ▼                 │
 cordic_derotator ─ NCO + CORDIC rotation; freq = fractional + integer + remainder CFO
   │
   ▼
 symbol_boundary ─ guard-interval correlation, moving sum, peak per symbol
   │        └── peak value → cordic_vec → fractional CFO angle
   ▼
 fft_in_*  ───────────────────────── external 2k FFT ─────────────────────── fft_out_*
                                                                               │
              ┌────────────────────────┬───────────────────────┬──────────────┘
              ▼                        ▼                       ▼
          joint_est                sp_mode_det             channel_est
   ICFO (voted) → RCFO, SCO     scattered-pilot phase    H, Y·conj(H), |H|²
```

`dvbt_sync_top` wires these blocks together with three `loop_filter` instances:

- **Fractional CFO loop.** It runs from reset until the integer offset is locked. Each symbol period, the angle of the guard-interval correlation peak is fed to the derotator's frequency word.
- **Remainder CFO loop.** At the lock, the integer offset is added to the frequency word as `icfo · 2^24/N`. From then on, the common phase step of the continual pilots (`rcfo_ang`) steers the frequency word.
- **Sampling loop.** The phase slope between the lower and upper halves of the spectrum (`sco_ang`) steers the interpolator's resampling ratio. The ADC clock is never touched.

The FFT and the ADC are not part of this RTL. The top brings out the FFT input and output as ports. The FFT output is expected in centred order: carrier k (0…1704) at output position k+172, one carrier per clock, with `fft_out_sym_start` on position 0.

`eq_ready` only says that every entry of the channel table has been written. The table is meaningful from the fourth symbol after `icfo_lock` rises. Before the lock, the pilots arrive on shifted carriers.

## Integer CFO without a symbol memory

An integer offset of n carriers moves every carrier to k+n. The continual pilots sit at fixed carriers and keep the same value from symbol to symbol, so the sum

    C(n) = Σ over pilots k of  z_l(k+n) · conj(sign(z_{l−1}(k+n)))

adds up coherently only at the true n. The estimate is the argmax of |C(n)| over n = −50…50.

Two observations make this cheap:

1. **Non-overlapping windows.** The 12 continual pilots {54, 156, 279, 432, 618, 759, 873, 984, 1101, 1206, 1323, 1491} are more than 100 carriers apart. The window k−50…k+50 of one pilot therefore never overlaps the next. Every FFT output position belongs to at most one (pilot, n) pair. So as the symbol streams in, each sample adds into exactly one of 101 running sums.
2. **Sign-only previous symbol.** The previous symbol is kept as sign bits. The product with its conjugate is then just ±re ± im, with no multiplier. The signs are collected 12 at a time in a shift register. They are written as one 24-bit word (12 real signs and 12 imaginary signs) into a 171 × 24 memory, which holds ⌈2048/12⌉ words. The previous symbol's word at the same address is read one word ahead. So the memory is touched once per 12 samples.

The 101 partial sums live in a 101 × 26 memory, 13 bits each for the real and imaginary parts. Each term is shifted right by 4 so that twelve of them fit. When the last search window (position 1541) has passed, the 101 sums are read out through the shared vectoring CORDIC, which computes the magnitude. An argmax follows. The result `icfo_raw` is ready well before the next symbol starts; an assertion checks the gap.

A vote accepts a value when it equals one of the two estimates before it (2 of 3). This sets `icfo_lock`.

### States

The state changes only at a symbol start:

| state     | memory 171×24 holds                         | work done                                 |
|-----------|---------------------------------------------|-------------------------------------------|
| `SIGN_WR` | signs of this symbol                        | none (first symbol)                       |
| `ICFO`    | signs of this symbol, previous ones read    | 101 correlations, Abs, argmax, vote       |
| `PIL_WR`  | full 12-bit values of the 45 continual pilots | none                                    |
| `TRACK`   | pilot values, read then overwritten         | z_l·conj(z_{l−1}) per pilot, two phases  |

In `TRACK`, four real multipliers form the pilot products. The products are summed separately:
- C1: pilots below the centre carrier 852;
- C2: pilots at or above it.

The same CORDIC then gives their angles, φ1 and φ2. The outputs are:
- `rcfo_ang = (φ1+φ2)/2`: the common phase step per symbol, which is the remainder CFO;
- `sco_ang = φ2−φ1`: the phase slope across the spectrum, which is the sampling offset.

All angles are 16-bit with 2^16 = 2π. To convert to physical units:
- The remainder CFO in carrier spacings is `rcfo_ang/2^16 · N/(N+Ng)`.
- The SCO is `sco_ang/2^16 · N/(N+Ng)` divided by the mean carrier distance between C1 and C2, which is about 763 carriers.

`PIL_WR` and `TRACK` expect the pilots at their nominal positions. The integer offset must therefore be removed upstream. The top does this through the derotator as soon as `icfo_lock` rises.

## Time-domain blocks

- **`ddc`**: a rotation CORDIC mixes the real IF down by an NCO at `FIF = 4.57/36.28 · 2^24`. Then an integrate-and-dump filter averages 4 samples (36.28 → 9.07 MS/s). Its output is 12 bits.
- **`interpolator`**: linear interpolation between the two newest samples, driven by a fractional-time accumulator.
  - The output spacing is `ρ = 1 + step_adj·2^-20` input periods. At the nominal step of −8356, 9.07 MS/s becomes 64/7 MS/s.
  - When the accumulator wraps, the controller emits two outputs for one input (`copy_evt`). When ρ > 1 it emits none (`discard_evt`).
  - `mu` is the sawtooth fractional phase.
  - At the nominal rates only copies occur. Discards happen only if the ADC runs slower than 4 × 64/7 MHz.
- **`cordic_derotator`**: a 24-bit phase accumulator and an 11-iteration rotation CORDIC in one unit. A frequency word of ε·2^24/N removes ε carrier spacings.
- **`symbol_boundary`**: forms r*(i)·r(i+N) and keeps a moving sum over the guard length Ng = 512 (delay line of N samples, FIFO of Ng products).
  - It tracks the maximum of |re|+|im| over each N+Ng period and reports its position and complex value.
  - The FFT window starts Ng samples after the peak.
  - A second `cordic_vec` in the top turns the peak value into the fractional-CFO angle.

## Frequency-domain blocks

- **`sp_mode_det`**: scattered pilots sit on carriers 3·m + 12·p, where m = l mod 4 and l is the symbol index. The block sums the power of each carrier class k mod 12 ∈ {0, 3, 6, 9}, leaving out continual-pilot carriers. The boosted pilots make the strongest class the mode. It outputs the mode of the symbol just received and the mode expected next.
- **`channel_est`**: H = Y/(±4/3) at each scattered pilot. The ±4/3 sign comes from the DVB-T reference sequence x^11+x^2+1.
  - A 569-entry table holds H for every carrier that is a multiple of 3. Each entry is refreshed whenever that carrier is a pilot again, so the table always reflects the current and three previous symbols.
  - Carriers in between are linearly interpolated in frequency: ⅔/⅓ and ⅓/⅔ of the two neighbours, with ×21846>>16 standing in for /3.
  - Outputs are H, the equalized value Y·conj(H) and the channel state |H|². A soft demapper divides or weights by |H|².
  - The output runs three carriers behind the input. `est_ready` rises once every entry has been written.
  - **Phase error.** Table entries are up to three symbols old, so any common phase the carrier loop has not yet removed turns the whole symbol against them. For each symbol, the block sums sign(p_k)·Y·conj(H) over the continual pilots, leaving out those that are scattered pilots of the same symbol. A pointer walking the sorted pilot list finds them. The angle of this sum (`cpe_re`, `cpe_im`, strobed by `cpe_valid` after carrier 1704) is the symbol's common phase error. It is an estimate only; the rotation that removes it is left to the demapper side.
- **`cordic_vec`**: pipelined vectoring CORDIC, 11 iterations plus 4 guard bits, latency ITER+1. It carries a tag so that a shared unit can tell its results apart.
- **`sdp_ram`**: synchronous RAM with one write and one read port and a registered read. Both estimator memories use it.
- **`loop_filter`**: PI filter with power-of-two gains, a load input and optional sign inversion.

## Number formats and timing

| quantity                  | format                                       |
|---------------------------|----------------------------------------------|
| ADC input                 | 10-bit signed                                |
| time-domain samples       | 12-bit signed complex                        |
| FFT in/out                | 12-bit signed complex                        |
| angles                    | 16-bit, 2^16 = 2π                            |
| derotator frequency word  | 24-bit, 2^24 = sample rate                   |
| interpolator step         | 16-bit signed, units of 2^-20                |
| channel estimate H        | 12-bit signed, Q.9 (512 = unity gain)         |

Loop gains:
- fractional and remainder CFO loops: integrator 2^-4 of the angle;
- sampling loop: integrator 2^-8, with inverted sign;
- proportional paths: off.

With the 100 ppm test offset, the loops settle within the 40 symbols the testbench runs.

## Where this departs from, or fills in, the original design description

The original description gives the receiver architecture and the insides of the joint estimator: the pilot set, the memory sizes, one 11-iteration CORDIC, the 2-of-3 vote and the four states. The following are this design's choices or readings:

- **Guard interval.** Fixed at 1/4 (Ng = 512); the description never names it.
- **Which symbol is reduced to signs.** Its formula puts the sign on the current symbol, but its text stores the sign of the previous one. The text is followed, as only that avoids storing a full symbol.
- **RCFO and SCO formula.** The printed formula subtracts the two half-spectrum phases for the CFO. Here the common phase is their mean and the SCO term their difference. The 1/(2π(1+Ng/N)) scaling is left to the loop gains.
- **Invented blocks.** The description names the down converter, interpolator, derotator, loop filters, scattered-pilot-mode detector and channel estimator without giving their insides. Each is built in the simplest form that does the job: CORDIC mixer with integrate-and-dump, linear interpolator, PI filters, power-per-class mode detection, zero-order hold in time with linear interpolation in frequency.
- **Channel phase error.** The description says the channel estimator also estimates the phase error left by imperfect synchronization, but gives no method. Here it is measured on the continual pilots against the channel table and output per symbol. It is not applied inside the block.
- **Loop control.** The acquisition order (fractional loop until lock, then integer + remainder), the loop gains and all word widths are this design's own.
- **Mode support.** Only 2k mode is built. At 8k the estimator would need ⌈8192/12⌉ = 683 sign words instead of 171. The boundary delay line and channel table would grow in the same proportion, and the pilot tables in `dvbt_pkg` are for 2k.
- **External parts.** The FFT and the ADC are outside the RTL.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_joint_est`        | two ICFO values in a row, the vote locking on the second one, each estimate finished inside its own symbol, state order, φ1/φ2/RCFO/SCO against a real-valued model with a phase step that changes every symbol |
| `tb_cordic_vec`       | magnitude and angle of random vectors against `$atan2`/`$sqrt`, latency |
| `tb_sp_ram`           | both memory sizes: random read/write, read latency, hold, read-before-write |
| `tb_symbol_boundary`  | peak position, window timing and peak phase for a cyclic-prefixed stream with a carrier offset |
| `tb_cordic_derotator` | a tone at the programmed frequency comes out standing still; latency; bypass at zero frequency |
| `tb_ddc`              | tone at IF + offset → baseband frequency, amplitude and rate |
| `tb_interpolator`     | interpolated values against floating point, copy and discard events for ρ < 1 and ρ > 1, event counts and copy spacing |
| `tb_loop_filter`      | integrator, proportional path, load and sign inversion against a model |
| `tb_sp_mode_det`      | mode and predicted mode for a sequence of symbols with random data |
| `tb_channel_est`      | H, Y·conj(H), \|H\|² on every carrier against a model of the pilot table, output delay, the phase-error sum and its angle with two symbols turned by a known phase |
| `tb_dvbt_sync_top`    | whole chain at default parameters (see below) |

`tb_dvbt_sync_top` runs the top with no parameter overrides:
- **Stimulus.** It generates a cyclic-prefixed OFDM-like signal at 64/7 MS/s with a 23.15-carrier frequency offset and a 100 ppm sampling offset. It puts the signal on the 4.57 MHz IF and samples it at 36.28 MHz.
- **FFT stand-in.** A behavioural stand-in answers every FFT window with a synthetic 2k symbol: pilots, QPSK data, the integer offset not yet removed, and phase terms driven by what the loops have not yet corrected. So all loops are closed.
- **Checks.** Over 40 symbol periods it checks:
  - stable symbol timing and FFT windows;
  - interpolator copies;
  - the fractional CFO estimate;
  - the integer estimates and the voted lock at 23;
  - the four estimator states in order;
  - the remainder CFO and SCO loops settling on their true values;
  - the scattered-pilot mode of every symbol after lock;
  - the equalizer output;
  - the common phase error: large while the carrier loop pulls in, below 0.05 rad at the end.

It counts how often each mechanism occurred and fails if one never did.

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dvbt_pkg.sv tb/tb_dvbt_sync_top.sv --top-module tb_dvbt_sync_top
./obj_dir/Vtb_dvbt_sync_top
```

Replace the testbench name to run another one. The end-to-end test simulates 40 symbol periods (about 100 k ADC samples) in a few seconds.
