# DTMF tone generation and Goertzel detection

A telephone key press is sent as two sine tones at once (dual-tone
multi-frequency, DTMF). One tone comes from a group of four low "row"
frequencies, the other from a group of four high "column" frequencies:

|                | 1209 Hz | 1336 Hz | 1477 Hz | 1633 Hz |
|----------------|---------|---------|---------|---------|
| **697 Hz**     | 1       | 2       | 3       | A       |
| **770 Hz**     | 4       | 5       | 6       | B       |
| **852 Hz**     | 7       | 8       | 9       | C       |
| **941 Hz**     | *       | 0       | #       | D       |

Detecting a key means measuring the energy at exactly these eight
frequencies. A full FFT computes far more bins than that. The Goertzel
algorithm computes one DFT bin with a single second-order recursion and
one real multiplication per sample. This RTL holds a complete test system
on one chip: a DDS generator makes the two tones of a key, a noise source
is added, and a Goertzel detector recovers the key. The detector comes in
two builds:

* **shared** (`goertzel_shared`, the default): one multiplier and one
  accumulator, time-shared over the eight bins by a small scheduling state
  machine;
* **parallel** (`goertzel_bank`): eight independent filters, each with its
  own multipliers.

Both builds give bit-identical results. The shared one trades clock
cycles, which are plentiful at audio sample rates, for area.

## Signal chain

```
key_in, key_valid
   |
freq_word_selector --inc_low/inc_high--> dds_core (2 x phase_accumulator + cos_lut)
                                              | tone1, tone2
                                         tones_generator --signal_out (8b)--+
awgn_gen --awgn_out (8b)-----------------------------------------------> signal_combiner
                                                                            | signal (16b)
                               goertzel_shared  or  goertzel_bank  (goertzel_control inside)
                                                                            | mag[8] (64b each)
                                                                  max_index_estimator
                                                                            | idx_max, idx_2nd
                                                                  freq_to_digit_lut --> out, out_valid
```

`dtmf_top` wires this chain together. A divider makes a one-clock
`sample_en` strobe every `SAMPLE_DIV` clocks. With a 125 MHz clock the
default of 15625 gives 8 kHz sampling. The generator, the noise source and
the detector all advance on this strobe. The detector reads `signal` on the
strobe, so it gets the sample built after the previous strobe. This adds one
sample of delay. It has no other effect.

Every `N` = 205 samples (25.6 ms at 8 kHz) a decision is made. The
detector writes the eight bin energies to `mag` and pulses `mag_valid`. One
clock later the estimator gives the indices of the two strongest bins. One
clock after that `out`/`out_valid` are updated and `out_stb` pulses.
Successive decisions are exactly `N * SAMPLE_DIV` clocks apart. Blocks run
continuously and are not aligned to key presses. A block that spans a key
change may therefore decode either key, or neither.

The top brings out every intermediate signal (generator output, noise,
detector input, sample counter, energies, indices). Monitoring them needs
no on-chip logic analyser.

## The Goertzel bin

For a tone of frequency f at sample rate FS, with `c = 2 cos(2 pi f / FS)`:

```
s[n] = x[n] + c * s[n-1] - s[n-2]          (every sample, s[-1] = s[-2] = 0)
E    = s1^2 + s2^2 - c * s1 * s2           (after the block; s1 = s[N-1], s2 = s[N-2])
```

The filter's complex output is `y = s1 - e^{-j 2 pi f/FS} s2`. `E` is
`|y|^2` written with real numbers only, so no complex output multiplier is
needed. The coefficient comes from the tone frequency itself, not from the
nearest integer bin `k = round(N f / FS)`. This keeps each bin centred on
its tone.

Fixed point, identical in both detector builds:

* `x`: 16-bit signed. The chain produces at most +-252.
* `c`: Q2.14 in 16 bits, `round(2 cos(2 pi f / 8000) * 16384)`. This gives
  27980, 26956, 25701, 24219, 19073, 16325, 13085 and 9315 for 697 through
  1633 Hz.
* state `s`: 32-bit signed. The product `c*s1` is shifted right by 14
  (arithmetic, so the result is rounded down). The same truncated value `t`
  is used in the recursion and in the energy, `E = s1*s1 + s2*s2 - t*s2`.
* `E`: 64 bits. Rounding can push the energy of an empty bin a few units
  below zero, so it is clamped at zero.

Overflow is not checked. For inputs of +-255 over 205 samples, `|s|` stays
below about 10^5 and `E` below 2^38. Much longer blocks or larger inputs
would need wider state.

## The shared-multiplier detector (`goertzel_shared`)

The sixteen state words (`s1`, `s2` for each bin) sit in two 8-entry
register arrays. A single 32 x 32 signed multiplier gets its operands from a
multiplexer controlled by the state machine:

| state    | clocks                     | multiplier operands           | action                                |
|----------|----------------------------|-------------------------------|---------------------------------------|
| `IDLE`   | until a strobe             | -                             | latch sample `x` and the `last` flag  |
| `UPDATE` | 8 (bin 0..7)               | `c[bin] * s1[bin]`            | `s1 <= x + t - s2`, `s2 <= s1`        |
| `ENERGY` step 0 | 1 per bin           | `c[bin] * s1[bin]`            | `t <= product >>> 14`                 |
| `ENERGY` step 1 | 1 per bin           | `s1 * s1`                     | `acc <= product`                      |
| `ENERGY` step 2 | 1 per bin           | `s2 * s2`                     | `acc <= acc + product`                |
| `ENERGY` step 3 | 1 per bin           | `t * s2`                      | `mag[bin] <= acc - product`, clear state |

`ENERGY` runs only after the last sample of a block: 4 x 8 = 32 clocks.
After the last bin, `mag_valid` pulses and the machine returns to `IDLE`.

Timing rules. These are checked by an assertion, which requires every
strobe to arrive in `IDLE`:

* an ordinary sample keeps the machine busy for 8 clocks, so strobes must
  be at least 9 clocks apart;
* after a block's last sample, `mag_valid` is set on the 40th clock edge.
  The next strobe must come at least 41 clocks after the last one.

`dtmf_top` enforces `SAMPLE_DIV >= 48` at elaboration. At 125 MHz and
8 kHz the machine is idle more than 99.9 % of the time. One multiplier
would have room for many more bins.

## The parallel detector (`goertzel_bank`)

Eight `goertzel_filter` instances share one `goertzel_control` sample
counter. Each filter updates on every strobe. On the edge after the
block's last sample, all eight compute their energy at once, each with its
own three multipliers, and clear their state. `mag_valid` follows one
clock after the last strobe. The only requirement is that strobes are at
least two clocks apart. This build is much larger: per bin, one 16x32 and
three 32x32 multipliers.

## Deciding the key

`max_index_estimator` returns the index of the largest energy and of the
second largest energy over all eight bins. Equal energies go to the lower
index. `freq_to_digit_lut` accepts the pair only if one index is a row bin
(0-3) and the other a column bin (4-7), in either order. The pair is then
looked up in the keypad grid. If both indices fall in the same group,
`out_valid` goes low and `out` keeps its old value.

Key codes (`key_in`, `out`): `0`-`9` are 0x0-0x9, `A`-`D` are 0xA-0xD,
`*` is 0xE and `#` is 0xF.

There is no energy threshold and no twist check. Silence gives all-zero
energies. The two strongest bins are then 0 and 1, which are both rows,
so no digit is reported. Noise with no tone, however, can put a row and a
column on top and produce a spurious digit. Tone-present qualification
would have to be added in front of `freq_to_digit_lut`.

## Generator and noise

* `freq_word_selector` turns the key code into two tuning words,
  `round(f * 2^16 / 8000)`: 5710, 6308, 6980, 7709 for the rows and 9904,
  10945, 12100, 13378 for the columns.
* `phase_accumulator` loads the tuning word into an increment register
  every clock. On each strobe it adds the increment to a 16-bit phase
  register, which wraps.
* `cos_lut` is a 256 x 8 ROM holding `round(63 cos(2 pi i / 256))`. It is
  computed at elaboration and addressed by the top 8 phase bits. The read
  is registered.
* `tones_generator` adds the two tones (at most +-126, which fits 8 bits)
  and outputs zero while `key_valid` is low.
* `awgn_gen` is a 32-bit xorshift generator stepped on each strobe. Four
  6-bit fields of its state are summed. This is close to Gaussian, with
  mean 126 and standard deviation about 37. The mean is removed and the
  result is shifted right by `noise_shift`. With `noise_shift = 0` the
  noise has an rms of about 37 against a tone pair of rms 63.
* `signal_combiner` adds tone and noise as signed values into the 16-bit
  detector input.

From strobe to new `signal_out` takes three clocks: phase register, ROM
register, sum register. The combined `signal` follows one clock later.

## Parameters

| where             | name               | default | meaning |
|-------------------|--------------------|---------|---------|
| `dtmf_top`        | `SAMPLE_DIV`       | 15625   | clocks per sample (>= 48) |
| `dtmf_top`        | `N`                | 205     | samples per decision block (2..4095) |
| `dtmf_top`        | `RESOURCE_SHARING` | 1       | 1: `goertzel_shared`, 0: `goertzel_bank` |
| `dtmf_pkg`        | `FS_HZ`            | 8000    | sample rate used for coefficients and tuning words |
| `dtmf_pkg`        | `PHASE_W`, `COEF_FRAC`, `ACC_W`, `MAG_W` | 16, 14, 32, 64 | number formats |
| `cos_lut`         | `ADDR_W`, `AMP_W`, `AMPLITUDE` | 8, 8, 63 | table size and tone level |
| `awgn_gen`        | `SEED`             | 0x12345678 | non-zero noise seed |

`FS_HZ` must match the real sample rate, which is clock / `SAMPLE_DIV`.
Every frequency-dependent constant is computed from it and from the tone
list in `dtmf_pkg`.

## How this design relates to the published one

This RTL follows a published DTMF design on a Zynq-7000 FPGA. From it come:

* the block chain: keypad, two-tone generator with frequency word selector,
  DDS core and tones generator, additive white Gaussian noise, frequency
  detection, max and second-max index estimator, frequency-to-digit lookup;
* the DDS structure: increment register, adder and phase register feeding a
  cosine table;
* the Goertzel filter structure;
* the eight-filter parallel detector with common control;
* the idea of a resource-shared detector scheduled by a state machine;
* the port and signal widths `key_in[3:0]`, `out[3:0]`, `Signal[15:0]`,
  8-bit generator and noise samples, and a 12-bit sample counter.

The published design states that the resource-shared detector can
recognise a tone within +-1.5 % of its nominal frequency. `tb_dtmf_offset`
tests exactly this.

Everything else is a choice made here, because the source gives no value
for it:

* the sample rate (8 kHz), clock (125 MHz) and block length (205);
* all number formats and the cosine table size;
* the 4-bit key coding;
* the noise generator;
* the exact schedule of the shared detector;
* the tie rule and the same-group rejection rule;
* an active-low reset.

The published keypad table gives 1366 Hz for the second column. The rest of
the source and the DTMF standard use 1336 Hz, which is used here.

The published description says the DDS performs digital-to-analog
conversion. Its system diagram, however, adds the noise and detects the
tones on chip. The tones therefore stay digital here, and there is no
converter.

The published detector module takes `Signal` as an input. Here the noisy
signal is produced on chip and only brought out. The top-level ports
replace the on-chip logic analyser of the original system. The keypad
scanner, the logic analyser, its JTAG link and the ARM processor of the
device are not part of the RTL. Neither is the FFT-based detector that the
published design compares against.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Reference
values come from `tb/dtmf_ref_pkg.sv`, which is written independently of
the RTL. It recomputes the tone table, tuning words, cosine table,
xorshift noise and a Goertzel model in plain integer arithmetic.

| testbench | what it shows |
|-----------|---------------|
| `tb_goertzel_filter` | energies bit-exact to the model for 8 coefficients x (random, on-bin, off-bin) blocks; `mag_valid` one edge after the last sample |
| `tb_goertzel_shared`, `tb_goertzel_bank` | all 8 energies bit-exact for 16 keys with noise plus random blocks; latency 40 / 1 edges; `cnt` sequence; the strongest row and column bins are the key's |
| `tb_dtmf_top` | both detector builds side by side (`SAMPLE_DIV` = 48): every key quiet and noisy, silence, identical energies, decision spacing |
| `tb_dtmf_top_full` | default parameters (8 kHz from 125 MHz): silence, all 16 keys with noise, release; about one minute of simulation |
| `tb_dtmf_offset` | the +-1.5 % tolerance: 16 keys x 9 offset combinations with noise, all decoded |
| others | generator, DDS, table, noise statistics and exact sequence, adder, counter, estimator, lookup |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dtmf_pkg.sv tb/dtmf_ref_pkg.sv tb/tb_dtmf_top.sv --top-module tb_dtmf_top
obj_dir/Vtb_dtmf_top
```

For any other testbench, replace the last file and the top-module name.
The design is two-state clean: every register that is read is reset.

## Size

After coarse synthesis with the default parameters (shared detector), the
top has about 430 word-level cells, 1300 flip-flop bits and 4.3 kbit of
ROM, with one 32x32 multiplier. In FPGA terms that multiplier needs about
four DSP48E1 slices, well within the 80 of an XC7Z010. The parallel build
needs about 112 such slices for its 32 multipliers. That is more than the
device has, so part of it would have to be built from LUTs.
