# A multiplier-free wavelet filter bank: 8-tap FIR filters in distributed arithmetic

A discrete wavelet transform (DWT) splits a signal into a coarse approximation
and a detail part. It does this with a pair of FIR filters, each followed by
decimation by 2. The inverse transform (IDWT) inserts zeros between samples
and filters again. Every output of an 8-tap filter is an inner product of
eight coefficients with eight samples. The usual way to build that is eight
multipliers and an adder tree.

This design computes every inner product with **distributed arithmetic (DA)**
instead. There are no multipliers. Each 8-bit sample is processed one bit per
clock. For each bit position, the eight bits of the eight most recent samples
form an address into a small table of precomputed coefficient sums. A
shift-and-add accumulator then weights each table output by its bit position.
With 8-bit samples, one 8-tap filter output takes 8 clocks and needs two
16-word tables, one ripple-carry adder and one accumulator.

On top of that filter the RTL builds:

* an **analysis stage** (`decimator`): a filter that keeps every second output;
* a **synthesis stage** (`interpolator`): zero insertion followed by a filter;
* a **level-1 2D forward transform** (`dwt2d_l1`): two chains, each a row stage
  followed by a column stage;
* a **level-1 2D inverse transform** (`idwt2d_l1`): the mirror of the forward
  transform;
* a top level (`dwt_idwt_top`) that places both transforms side by side.

## How the DA filter computes an inner product

`fir_da8` computes `y(n) = sum_{k=0..7} c_k * x(n-k)` for 8-bit
two's-complement samples. A sample can be written bit by bit:

    x = -x[7]*2^7 + sum_{j=0..6} x[j]*2^j

Put that into the sum and swap the two sums:

    y = -2^7 * P(7) + sum_{j=0..6} 2^j * P(j),    P(j) = sum_k c_k * x(n-k)[j]

`P(j)` depends only on the eight bits `x(n)[j] ... x(n-7)[j]`. So it can be
read from a table addressed by those eight bits. A single table would hold
256 words. Instead the table is **partitioned** into two 16-word tables
(`da_lut`): one is addressed by taps 0-3, the other by taps 4-7. A
ripple-carry adder (`rca`) adds their outputs. The table contents are
computed at elaboration from the coefficient parameter: word `a` is the sum
of the coefficients whose address bit is set.

The datapath, one bit per clock:

    x ──► [parallel-to-serial, MSB first] ──bit──┬──────────────► addr[0]
                                                 ▼
                        [cascade: 7 x 8 one-bit stages] ─ taps at 8k-1 ─► addr[k]
    addr[3:0] ─► lut_1 ─┐
                        ├─► rca ─► P(j) ─► acc = (first bit) ? -P : 2*acc + P
    addr[7:4] ─► lut_2 ─┘

* **Parallel-to-serial register.** It loads a sample and shifts it out MSB
  first. MSB first means the sign bit comes first, so the accumulator starts
  with `-P`. After that it doubles and adds once per bit. The result is exact:
  no low-order bits are lost.
* **Bit-serial cascade.** This is a 56-bit shift register. It moves one place
  per bit-clock, so a bit needs exactly 8 bit-clocks (one sample frame) to
  reach the next tap. Position `8k-1` therefore holds bit `j` of `x(n-k)`
  while the serialiser is sending bit `j` of `x(n)`. The cascade shifts only
  while a frame is running, so gaps between samples do not disturb the
  history.
* **Output.** `y_full` is the exact 19-bit sum. `y` is `y_full >>> 6` (the
  coefficient scale) saturated to 8 bits. Chained stages pass `y`.

**Timing.** The filter accepts a sample when `x_valid && x_ready`. It then
runs 8 bit-clocks, and `y_valid` pulses 9 clocks after acceptance. `x_ready`
is also high in a frame's last clock, so samples can follow back to back at
one per 8 clocks. Everything advances only when `ce` is high, which lets a
stage run at a fraction of the clock rate.

## Analysis stage: filter, then keep every second output

`decimator` is `fir_da8` followed by `downsampler`. In the downsampler, a
1-bit counter toggles on each filter result. A register loads the result
when the counter is 0. So outputs 0, 2, 4, ... after reset are kept, which
gives `S(m) = sum_k c_k x(2m-k)`. A kept output appears 10 clocks after its
input sample was accepted.

## Synthesis stage: zero insertion by a counter-cleared register

`interpolator` is `upsampler` followed by `fir_da8`. When the upsampler
accepts a sample, it loads the sample into an 8-bit register and starts a
4-bit counter.

* While the counter's MSB is 0 (counts 0-7), the register keeps the sample.
* When the MSB becomes 1 (counts 8-15), the MSB clears the register.

The filter takes the register contents at counts 1 and 9. So it sees `x(0),
0, x(1), 0, ...`, one per 8-clock frame, and gives two outputs per input
sample. These appear 11 and 19 clocks after the sample was accepted. The
upsampler can accept a new sample at count 15, so the input rate is one
sample per 16 clocks.

## The 2D arrangement and its rates

`dwt2d_l1` sends each input sample to two row decimators: lowpass and
highpass. Each row decimator feeds a column decimator with the same filter.
The two outputs are `ll` (lowpass twice) and `hh` (highpass twice). The input
rate is one sample per 8 clocks. A row stage emits one result per 16 clocks,
and the column stage is always ready for it (an assertion checks this).
Each output gives one sample per four inputs.

`idwt2d_l1` mirrors this with interpolators and the synthesis filters. Its
rates need care. An interpolator doubles the sample rate, but a filter can
produce only one output per 8 clocks. A column interpolator can therefore
take only one input per 16 clocks. For this reason the row interpolators run
on a clock enable that is high every second clock. At half rate they produce
one result per 16 clocks, and the column stage takes these back to back (an
assertion checks that none is missed). The input rate is one sample per
32 clocks. Each chain (`a`: lowpass, `b`: highpass) gives four outputs per
input.

**Both 2D transforms filter streams, not images.** There is no memory that
reorders data between the row stage and the column stage. The column stage
filters the row stage's output in the order it arrives. To transform an
image properly, the caller must put the data into column order between the
stages, or add a transposition buffer. Only two of the four level-1 subbands
(LL and HH) are produced. The LH and HL chains would be two more decimator
chains with mixed filters.

## Coefficients and number formats

The filters use the 8-tap Daubechies wavelet (db4), scaled by 64 and rounded
to signed 8-bit integers (`dwt_pkg`):

| set | taps c0 ... c7 |
|---|---|
| `LP_ANALYSIS`  | 15, 46, 40, -2, -12, 2, 2, -1 |
| `HP_ANALYSIS`  | -1, -2, 2, 12, -2, -40, 46, -15 (`g[k] = (-1)^k h[7-k]`) |
| `LP_SYNTHESIS` | time reverse of `LP_ANALYSIS` |
| `HP_SYNTHESIS` | time reverse of `HP_ANALYSIS` |

The choice of wavelet and scale is this design's own. Any 8-tap set of 8-bit
coefficients can be passed as the `COEFS` parameter, and the tables follow
it. Samples are 8-bit two's complement throughout. Each filter brings its
result back to 8 bits (shift by 6, saturate). Because the lowpass gain is
about 1.41, large inputs saturate after two lowpass stages. The IDWT is
therefore not a bit-exact inverse of the DWT. Nothing in the design relies
on perfect reconstruction, and the testbenches do not claim it.

## How far to trust it, and where it departs from the original description

Verified in simulation against integer multiply-add reference models that
are independent of the bit-serial hardware:

* every block on its own;
* the whole top level on a 256 x 256 synthetic image streamed through the
  forward transform, with its LL output fed back into the inverse transform
  (65,536 and 16,384 inputs, over 160,000 output comparisons).

The testbenches also check latencies and rates. Each one has been shown to
fail on a deliberately broken copy of its block.

Departures and own choices:

* **Coefficient values and widths, the output requantisation, the
  handshakes and the reset** (synchronous, active high) are not specified by
  the original description. They were chosen here.
* **Resource use.** The original implementation reports about 50
  flip-flops, 70 4-input LUTs and 5 global clocks for the DWT-IDWT
  combination. A bit-serial DA filter as described needs a 56-bit history
  cascade per filter. This RTL has 8 filters and about 940 flip-flop bits
  after generic synthesis. It follows the described filter structure, not
  the reported numbers.
* **One clock with enables.** The rate adaptation of the inverse transform
  uses a clock enable on one clock instead of derived clocks.
* **The 4-bit counter** starts when a sample is accepted and stops after 16
  counts, instead of running freely.
* **IDWT stage order.** The described order of the inverse transform's
  stages is ambiguous: the prose says columns first, the block diagram shows
  rows first. The RTL follows the block diagram (rows, then columns); the
  two stages are identical, so only the naming differs.
* **Filter assignment.** Which filter sits in which chain of the 2D stages
  is not given. Lowpass/lowpass and highpass/highpass were chosen.

## Simulating and changing it

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, to run the end-to-end test:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_idwt_top.sv \
        --top-module tb_dwt_idwt_top -o sim
    ./obj_dir/sim

Replace `tb_dwt_idwt_top` with any other `tb/tb_*.sv` to test one block.
`tb/dwt_ref_pkg.sv` holds the reference models: a direct-form filter, the
analysis stage and the synthesis stage.

Things that are easy to change:

* **Coefficients.** Pass new `dwt_pkg::coefs_t` values as `COEFS`, or edit
  the sets in `rtl/dwt_pkg.sv`. The tables are recomputed.
* **Coefficient scale.** Set `COEF_FRAC` on `fir_da8`. The reference model
  reads `dwt_pkg::COEF_FRAC`.
* **Sample width.** Set `DATA_W`. The frame length follows: one sample per
  `DATA_W` clocks. The upsampler's 4-bit counter assumes 8-clock frames.

| file | contents |
|---|---|
| `rtl/dwt_pkg.sv` | widths, coefficient type and the four coefficient sets |
| `rtl/da_lut.sv`, `rtl/rca.sv` | partial table, ripple-carry adder |
| `rtl/fir_da8.sv` | bit-serial DA filter |
| `rtl/downsampler.sv`, `rtl/decimator.sv` | analysis stage |
| `rtl/upsampler.sv`, `rtl/interpolator.sv` | synthesis stage |
| `rtl/dwt2d_l1.sv`, `rtl/idwt2d_l1.sv`, `rtl/dwt_idwt_top.sv` | 2D transforms and top |
| `tb/tb_*.sv`, `tb/dwt_ref_pkg.sv` | self-checking testbenches and reference models |
