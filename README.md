# 48-tap distributed-arithmetic FIR filter with nonnegative lookup tables

A distributed-arithmetic (DA) FIR filter replaces the multipliers with a lookup
table: the input samples are processed one bit position at a time, the bits of
all taps at one position address a table that holds the matching sum of
coefficients, and a shift-accumulator weights those sums by powers of two. In
the usual formulation the table words are signed, so small signals that swing
around zero make the upper bits of every table output, adder and accumulator
toggle with each sign change.

This design uses a rearranged form of the DA sum in which **every table word is
a sum of coefficient magnitudes and so is never negative**. The coefficient
signs are folded into the table contents, the adders and the accumulator work
on unsigned values with no sign extension, and a single signed subtraction at
the very end yields the filter output. The upper bits of the datapath then
toggle only when large values really occur, which cuts dynamic power.

The RTL is a 48-tap lowpass filter with 16-bit samples and 12-bit
coefficients. It produces one output every 16 clocks.

## The arithmetic

Let the samples be `x_i` (16-bit two's complement integers) and the
coefficients `c_i`. The filter output is `Y = sum_i c_i * x_i`.

**Digit recoding.** Each bit `x_{i,j}` becomes a digit `d_{i,j}` in {-1, +1}:
`d = +1` for a 1 bit and `d = -1` for a 0 bit, with the sign reversed for the
sign bit `j = 15`. With these digits

    x_i = ( sum_j d_{i,j} * 2^j  -  1 ) / 2

A digit is stored as one bit, **0 for +1 and 1 for -1**. The stored code is
therefore the inverted bit for bits 0 to 14 and the bit itself for bit 15.

**Folding the signs into the table.** Write `c * d = |c| * (1 - 2u)`. Here
`u = 1` exactly when `sign(c) * d = -1`, so `u = code XOR sign_bit(c)`. Summing
over taps and bit positions gives

    Y = K_PROP - sum_{k=0}^{15} a_k * 2^k
    a_k    = sum_i |c_i| * u_{i,k}          (table word for bit plane k, >= 0)
    K_PROP = S * 2^15 - P                   (S = sum |c_i|, P = sum of positive c_i)

Only the table word `a_k` depends on the data. The table is addressed by the
codes of bit plane `k` directly. The sign of each coefficient is built into
the contents, so no extra logic forms `u`.

**Example.** Take the two-tap filter `y = -x1 + 2*x2`. Its table, indexed by
the digits `(d1, d2)`, holds:

| d1 | d2 | word |
|----|----|------|
| +1 | +1 | 1    |
| +1 | -1 | 3    |
| -1 | +1 | 0    |
| -1 | -1 | 2    |

The output is then `y = 3 - 2*word`. For 48 taps and 16-bit integers, the
constant and the factor become `K_PROP` and the powers of two above.

For the default coefficients S = 7100 and P = 5496, so
`K_PROP = 7100 * 2^15 - 5496 = 232647304`. The function `da_pkg::k_prop()`
computes it at elaboration.

## Datapath

    x ─► d_encoder ─► 16 x s2p_reg (48 taps each) ─► bitplane_mux (16:1, 48 bits)
                                   ▲ shift once per 16 clocks        ▲ cnt
                                                                bit_counter
      ─► lut48_prop ─► da_mac (shift-right, 30 bits) ─► out_stage: y = K_PROP - acc

| Module          | Role |
|-----------------|------|
| `da_pkg`        | Sizes, default coefficients, table-content and `K_PROP` functions, range check |
| `d_encoder`     | Bit-to-digit-code recoding (inverters on bits 0..14) |
| `s2p_reg`       | One bit plane: a 48-bit shift register, `q[0]` is the newest sample |
| `bitplane_mux`  | Picks bit plane `cnt` for all 48 taps |
| `bit_counter`   | 4-bit plane counter; its decodes `first` (0) and `last` (15) sequence the filter |
| `lut48_prop`    | The 2^48-word table, split into four 2^12-word tables and three chained adders |
| `lut4k_prop`    | A 2^12-word table: four 2^3-word tables and a two-level adder tree |
| `lut8_prop`     | A 2^3-word table for three taps, 13-bit words computed at elaboration |
| `da_mac`        | `acc <= (first ? 0 : acc >> 1) + (word << 15)` |
| `out_stage`     | Registered `y = K - acc`, the only signed arithmetic in the filter |
| `da_fir48_prop` | Top level |

### Table decomposition

A table indexed by all 48 digit codes would need 2^48 words. It is split twice:

* Taps 12g to 12g+11 (g = 0..3) address one 2^12-word table. The four results
  are added in a chain: `((L0 + L1) + L2) + L3`.
* Inside each 2^12-word table, taps 3t to 3t+2 address one 2^3-word table. The
  four results are added as `(T0 + T1) + (T2 + T3)`.

Splitting a table never breaks the nonnegative property. The sum of
nonnegative parts is nonnegative, so all adder carry inputs are zero. A signed
DA table, by contrast, needs a multiplexer, a one's complementer and a carry-in
per sub-table.

### Widths and the range rule

| Point                   | Bits | Why |
|-------------------------|------|-----|
| 2^3-word table          | 13   | 3 x 2048 < 2^13 for any 12-bit coefficients |
| 2^12-word table, adders | 13   | Published width. It holds when each 12-tap magnitude sum is < 2^13 |
| 2^48-word table         | 15   | 30 - 15. The chain grows 13 bits to 15 |
| accumulator             | 30   | Published width. Exact when `S < 2^14` |
| output `y`              | 31   | Signed, holds `K_PROP - acc` |

The widths are exact for any coefficient set whose 3-tap, 12-tap and total
magnitude sums stay below 2^13, 2^13 and 2^14. `da_pkg::coef_set_fits()` tests
this, and an assertion in the top level reports a set that violates it. The
default set has 12-tap sums of 83, 3467, 3467 and 83, with a total of 7100.

## Timing

`clk` is the bit clock. A frame is 16 clocks, `cnt = 0 .. 15`.

* In the clock where `cnt = 15`, `x_take` is high. The rising edge that ends
  this clock shifts `x` into the sample registers.
* The following 16 clocks present bit planes 0 to 15 of the new history, least
  significant first. At `cnt = 0` the MAC drops its feedback and starts a new
  sum.
* After the 16th word, `acc` holds `sum_k a_k 2^k`. On the next edge (`cnt = 0`
  of the following frame) `out_stage` registers `y = K_PROP - acc`, and
  `y_valid` is high for one clock.

From the edge that takes sample `x[n]` to the edge that updates
`y = sum_i c_i x[n-i]` is 17 clocks. Throughput is one sample per 16 clocks.
A 1.2288 MS/s stream therefore needs a 19.66 MHz bit clock, and 44.1 kS/s
audio needs 705.6 kHz.

Reset (`rst_n`, synchronous, active low) does three things:

* It loads every sample register with the code of a zero sample, so the
  history starts at zero.
* It clears the MAC and the output.
* It suppresses the output of the frame that is running when reset is
  released. As a result, every `y_valid` pulse belongs to exactly one taken
  sample.

## Interface of `da_fir48_prop`

| Port      | Dir | Width | Meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | bit clock (16 per sample) |
| `rst_n`   | in  | 1     | synchronous active-low reset |
| `x`       | in  | 16    | sample, two's complement, taken on the edge that ends an `x_take` clock |
| `x_take`  | out | 1     | high in the clock whose rising edge takes `x` |
| `y`       | out | 31    | signed output `sum_{i=0}^{47} COEF[i] * x[n-i]`, in integer units |
| `y_valid` | out | 1     | one-clock pulse when `y` is new |

The only parameter is `COEF`, a packed `[47:0][11:0]` array in which element
`i` is the coefficient of tap `i`. The other sizes are constants in `da_pkg`.

## Coefficients

The default set is a 48-tap equiripple lowpass filter, rounded to 12 bits with
a peak of 2047. It targets a passband edge at 0.26 fs, a stopband edge at
0.37 fs, at most 0.7 dB passband ripple and at least 50 dB stopband
attenuation. After rounding it reaches about 0.02 dB ripple and 63 dB
attenuation. Any other set can be passed through `COEF` if it meets the range
rule. The table contents, `K_PROP` and the range check all follow from it at
elaboration.

## What follows the published architecture and what is this design's own

Taken from the published design:

* the digit recoding
* the 16 bit-plane shift registers and the 48-bit 16:1 multiplexer driven by a
  4-bit counter
* the four-way and sixteen-way table decomposition with the chain and tree
  adder arrangement
* the 13-bit table widths
* the 30-bit shift-right MAC
* the final negation plus constant

Choices made in this design:

* **One clock.** The published design clocks the sample registers with a
  separate sample clock at 1/16 of the bit clock. Here that clock is the
  enable `x_take`.
* **Counter decodes.** The MAC clear comes from `cnt == 0`, and the sample
  enable from `cnt == 15`.
* **Output stage.** The output is registered, is 31 bits wide, has a
  `y_valid` strobe and suppresses the output of the frame running at reset
  release.
* **Reset values**, including the zero-sample code in the shift registers.
* **Integer scaling.** The filter works in integer units, with `K_PROP`
  scaled by 2^15, instead of fractional samples.
* **Coefficient values.** The published design gives only the specification,
  not the values.
* **Width of the 2^48-word table.** It is 15 bits, derived from the 30-bit
  accumulator.
* **Bit order inside a 2^3-word table.** Tap 3t+k drives address bit k.

The 2^12-word adders are 13 bits wide, following the published block diagram.
One published plot labels them 15-bit adders. With 13 bits the range rule
above applies; widening them would lift it.

The signed-table version of the filter (multiplexer, one's complementer and
carry-in per 2^3-word table) is only a point of comparison. It is not
included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

| Testbench          | What it checks |
|--------------------|----------------|
| `tb_d_encoder`     | All 2^16 samples: each digit and the identity `x = (sum d_j 2^j - 1)/2` |
| `tb_s2p_reg`       | Reset value, then 2000 clocks of random shifting under a random enable |
| `tb_bitplane_mux`  | Every select value on random planes |
| `tb_bit_counter`   | Count sequence, wrap, `first`/`last`, spacing of `last` |
| `tb_lut8_prop`     | All words of three sets, including the two-tap example and the extreme coefficients, against `(sum|c| - sum c*d)/2` |
| `tb_lut4k_prop`    | All 4096 words of the largest 12-tap group |
| `tb_lut48_prop`    | All-zero and all-one addresses, one-hot addresses and 5000 random addresses |
| `tb_da_mac`        | 300 frames, including the largest allowed words, against `sum m_k 2^k` |
| `tb_out_stage`     | `K_PROP` of the default set, `y = K - acc`, `y_valid` timing |
| `tb_da_fir48_prop` | Full filter at its defaults, see below |
| `tb_lut_toggle`    | Switching activity of the 2^3-word table outputs, see below |

`tb_da_fir48_prop` compares 3860 outputs with a direct convolution. The test
signals are:

* an impulse, which must replay the coefficients
* runs of +32767 and -32768
* 2500 uniformly random samples
* 1200 samples of a low-amplitude signal that drifts around zero, as a
  stand-in for speech

It also checks that samples are taken every 16 clocks and that the output
latency is exact. It counts negative and positive outputs, negative samples
and MAC restarts after a nonzero sum, and fails if any of these never occur.

`tb_lut_toggle` runs 10000 random samples and prints the average transition
rate of each of the 13 table output bits. The upper bits toggle rarely: bit 13
never toggles with the default set, while bits 1 to 7 toggle at roughly 0.24
to 0.50 per clock. The test fails if the top four bits average more than half
the rate of the low seven.

No gate-level power figures are reproduced. The RTL shows the mechanism (the
quiet upper bits), not absolute power.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module tb_da_fir48_prop rtl/da_pkg.sv tb/tb_da_fir48_prop.sv
    ./obj_dir/Vtb_da_fir48_prop

Swap in any other testbench name. `rtl/da_pkg.sv` must come first because
every module imports it. The full-filter test runs in well under a second.

## Changing the design

* **New filter response:** pass another `COEF` to `da_fir48_prop` and check it
  with `da_pkg::coef_set_fits()`. The tables and `K_PROP` follow
  automatically.
* **Wider coefficient sums:** raise `LUT12_W` and `ACC_W` in `da_pkg`.
  `LUT48_W` and `Y_W` follow.
* **A different tap count or table split:** edit the generate loops in
  `lut4k_prop` and `lut48_prop`. They assume 48 taps in four groups of four
  3-tap tables.
