# High-pass FIR filter with distributed arithmetic

An 18-tap (order 17) high-pass FIR filter that uses no multipliers. It computes

    y(n) = sum_{i=0}^{17} h(i) * x(n-i)

for 16-bit signed samples and 16-bit coefficients. The sum is exact and comes out in
33 bits. The filter uses *distributed arithmetic* (DA). It does not multiply each sample by
its coefficient. Instead it takes the bits of equal weight from all 18 samples, one weight per
clock cycle. Those 18 bits address a table that holds the precomputed sums of the matching
coefficients. A shift-accumulator then adds the table outputs with the right powers of two.
The cost is time: one output takes one clock per input bit, 16 clocks in all. In return there
are no multipliers, only small ROMs, adders and registers, and on an FPGA that is the resource
that is cheap.

The filter was designed for 8 MHz sampling, a 1.5 MHz cutoff and a Kaiser window (beta 0.5).
At 16 clocks per sample, 8 MHz sampling needs a 128 MHz clock.

## The filter

The coefficients are 16-bit two's-complement integers. As Q1.15 fractions they are the impulse
response:

| i    | 0    | 1    | 2    | 3    | 4    | 5    | 6    | 7    | 8    |
|------|------|------|------|------|------|------|------|------|------|
| h(i) | 03cd | 045e | fece | f8d2 | fafd | 067d | 101f | 055d | bb54 |

| i    | 9    | 10   | 11   | 12   | 13   | 14   | 15   | 16   | 17   |
|------|------|------|------|------|------|------|------|------|------|
| h(i) | 44ac | faa3 | efe1 | f983 | 0503 | 072e | 0132 | fba2 | fc33 |

The coefficients are antisymmetric: h(17-i) = -h(i). That makes this a type 4 FIR filter, with
even length and odd symmetry. Two consequences show up in the tests. The coefficients sum to
zero, so a constant input gives a zero output. The two centre taps are ±0.54 (±17580) and
dominate the response. All coefficients are in `rtl/fir_hp_pkg.sv` (`H`), and the ROM
contents are computed from them at elaboration time.

## How distributed arithmetic computes the sum

Write each input sample as a W_d-bit two's-complement integer, with bits x_i[k]:

    x_i = -x_i[W_d-1] * 2^(W_d-1) + sum_{k=0}^{W_d-2} x_i[k] * 2^k

Substitute this into y = sum_i h(i) x_i and swap the two sums:

    y = sum_{k=0}^{W_d-2} F(k) * 2^k  -  F(W_d-1) * 2^(W_d-1)
    F(k) = sum_i h(i) * x_i[k]

F(k) depends only on the *bit plane* k, which is the vector of bit k of every sample. It can
therefore take only 2^N values, and a table addressed by the plane can hold all of them. The
filter never multiplies. Each clock it reads one table entry, and it adds that entry at weight
2^k. On the last plane, the sign bit, it subtracts the entry instead.

**Splitting the table.** A table over all 18 taps would need 2^18 words. The address is
therefore cut into three 6-bit slices. Each slice addresses its own 64-word table over six
consecutive coefficients: h(0..5), h(6..11) and h(12..17). The three outputs are added. This
gives 3 × 64 words in place of 262 144, and the only cost is two adders.

**The shift-accumulator.** Adding F(k) at weight 2^k directly would need a shifter. The
accumulator uses Horner's scheme instead. Each clock it shifts its register right by one place
and adds the new F at the top weight:

    acc <= (acc >>> 1) + (±F(k) << (W_d-1))

A term that enters at plane k is shifted right W_d-1-k times. It carried W_d-1 zero bits on
entry, so no bit is ever lost, and after W_d clocks the register holds y exactly. The
register is 36 bits wide (17 + 2 + 16 + 1), which holds every intermediate value. The output
is its low 33 bits. The largest possible |y| is 32768 × sum|h(i)| < 2^31, so the output can
never overflow.

## Datapath

    filter_in → delay line → [pre-adder] → transposition → 3 ROM LUTs → shift-accumulator → filter_out

| Block | Module | What it does |
|-------|--------|--------------|
| Delay line | `delay_line` | 18 × 16-bit register chain. Advances once per sample and shows x(n)..x(n-17) in parallel. |
| Pre-adder | `pre_adder` | Optional (`PREADD=1`). Folds the antisymmetric taps into 9 words, x(n-i) - x(n-17+i), each 17 bits. |
| Transposition | `transposition` | One parallel-load shift register per word, shifted right each clock. Its LSBs form the current bit plane, LSB first. |
| ROM LUTs | `rom_lut` ×3 | F(a) = sum of a[j]·h(BASE+j). Combinational read, contents computed at elaboration. |
| Shift-accumulator | `shift_accumulator` | Adds the three LUT outputs and runs the Horner recurrence. On the sign plane it subtracts and registers the result. |
| Control | in `fir_hp_da` | Bit-phase counter 0..W_d-1 that sequences everything. |

### Schedule of one sample (default, W_d = 16)

| phase (enabled clocks) | action |
|---|---|
| 15 | `in_strobe` is high. `filter_in` enters the delay line at the clock edge. |
| 0  | The transposition registers load the 18 taps. In the same cycle the accumulator finishes the *previous* sample with its sign plane. |
| 1  | Plane 0 (LSBs) goes through the LUTs. The accumulator starts from zero. |
| 2 … 15 | Planes 1 … 14 |
| 0 (next period) | Plane 15, the sign plane, is subtracted. `filter_out` is written and `out_valid` is high in the following cycle. |

So a new sample is taken every 16 enabled clocks, and each result appears W_d + 2 = 18
enabled clocks after its sample was taken. The impulse response needs 17 further sample
periods to come out completely: its last value h(17) appears 17 × 16 + 18 = 290 enabled
clocks after the impulse is sampled.

## Interface (`fir_hp_da`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `clk_enable` | in | 1 | When low, every register holds. Stalls only stretch time. |
| `reset` | in | 1 | Synchronous, active high. Clears the history, the phase counter and the output. |
| `filter_in` | in | 16 | Signed sample. Read at the clock edge that ends a cycle with `in_strobe` high. |
| `filter_out` | out | 33 | Signed result y(n). Held until the next result. |
| `in_strobe` | out | 1 | High in the one enabled cycle per period in which `filter_in` is sampled. |
| `out_valid` | out | 1 | One-cycle pulse when `filter_out` has just changed. |

After reset nothing is reported until the first sample has gone through. The first
`out_valid` belongs to the first sample taken.

Parameter `PREADD` (default 0):

* `0`: all 18 taps feed the tables. There are 3 LUTs of 6 address bits (64 words) and
  W_d = 16.
* `1`: the pre-adder folds the taps using the antisymmetry. 9 words of 17 bits feed 3 LUTs
  of 3 address bits (8 words), and W_d = 17, so a sample takes 17 clocks. The outputs are
  identical. This trades 168 ROM words for 9 subtractors and one extra clock per sample.

## Where this RTL departs from the original description, and why

* **LUT word width.** The original sizing gives two of the tables 12-bit words and one table
  17-bit words. With these coefficients as exact integers, the outer groups need 13 signed
  bits (their sums reach ±3752), and no grouping of the twelve small coefficients fits in 12.
  All three tables here use 17-bit words, so every sum is exact. `rom_lut` refuses at
  elaboration a width that is too small for its group.
* **Pre-adder off by default.** The original block diagram includes a pre-adder stage, to be
  used "if the filter is symmetric". Its table sizing, however, is for an 18-bit address
  (3 × 6 bits), which means no folding, and the filter is antisymmetric. The default follows
  the table sizing. The pre-adder is available, as a subtractor for odd symmetry, with
  `PREADD=1`.
* **Output width.** The specification says 33 bits, and its simulation waveforms label the
  output as 32 bits. 33 bits are kept. The exact result fits in 32 bits, so the top bit is
  always a copy of the sign.
* **Overflow detection.** The original notes that the accumulator needs guard bits for
  overflow detection. Here the accumulator is sized so that overflow cannot happen, so there
  is no overflow flag. A simulation assertion in `shift_accumulator` reports any result that
  does not fit the 33-bit output, which can only happen after a change of coefficients or
  widths.
* **This design's own choices:** the sequencing (phase counter), `in_strobe` and `out_valid`,
  the synchronous reset, the clock-enable semantics, the grouping of consecutive coefficients
  into the three tables, and a combinational (distributed) ROM read.
* **Not included:** the fully parallel multiply-add version of the same filter (a baseline
  for comparison only) and any on-chip debug logic.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_delay_line` | Random samples with a random shift enable. All 18 taps are compared with a reference history every clock. Reset is checked too. |
| `tb_pre_adder` | Both fold modes, with random and full-scale taps. |
| `tb_transposition` | Bit planes 0..15 of random and full-scale words, with clock-enable stalls that must hold the plane. |
| `tb_rom_lut` | Every address of the three 64-word tables and the three 8-word tables, against a coefficient list written out separately in the testbench. |
| `tb_shift_accumulator` | 500 frames of random and extreme table words against the closed-form sum. Also checks the `y_valid` timing and stalls. |
| `tb_fir_hp_da` | End to end, all defaults: impulse (must give h(0)..h(17)), constant -1 (must settle to 0), sine at 1.6 MHz / 8 MHz with amplitude 5 and 20000, 400 random samples with full-scale values, random `clk_enable` stalls. Every output is compared with a direct convolution. It also checks one sample per 16 enabled clocks, an 18-clock latency, and that h(17) leaves 17 × 16 + 18 clocks after the impulse, and requires that stalls, negative and full-scale inputs, and the full impulse response all occurred. |
| `tb_fir_hp_da_preadd` | The same test with `PREADD=1` (17 clocks per sample, 19-clock latency). |

All of them pass. Each block's testbench was also run against a deliberately broken version of
its block (for example, the sign plane added instead of subtracted) and caught it.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal --top-module tb_fir_hp_da \
        -y rtl -y tb +libext+.sv rtl/fir_hp_pkg.sv tb/tb_fir_hp_da.sv
    ./obj_dir/Vtb_fir_hp_da

Use any other testbench name in the same way. Every test runs in well under a second.
The package `rtl/fir_hp_pkg.sv` must be on the command line. The modules are found through
`-y`.

## Changing it

* **Coefficients:** edit `H` in `fir_hp_pkg`. The tables follow automatically. If a group
  sum no longer fits in `LUT_W`, elaboration stops with an error. The end-to-end testbenches
  keep their own copy of the coefficients (`HREF`), so update that copy too.
* **Pre-adder:** `PREADD=1` assumes antisymmetric coefficients. For a symmetric filter, set
  `ANTI` to 0 on the `pre_adder` instance.
* **Table split:** `NLUT` in the package sets the number of tables. The number of DA inputs
  (18, or 9 with the pre-adder) must divide evenly by it.
