# Multiplier-less FIR filters by distributed arithmetic

An FIR filter computes `y(n) = Σ h(i)·x(n−i)`. A direct implementation needs one
multiplier per tap. Distributed arithmetic (DA) removes the multipliers. The
samples are split into bit planes, and each plane selects a precomputed sum of
coefficients. A weighted sum of these partial sums gives the output:

```
x(n−i) = Σ_b 2^b · x_b(n−i)              (x_b = bit b, unsigned samples)
y(n)   = Σ_b 2^b · [ Σ_i h(i)·x_b(n−i) ] = Σ_b 2^b · T(p_b)
```

`p_b` is the TAPS-bit word made of bit `b` of every sample in the window. `T(p)`
is the sum of the coefficients whose address bit is 1. `T` is the DA table.
Each term therefore costs one table look-up, and the weights `2^b` are plain
wiring shifts.

This RTL builds the bit-parallel form of DA. There is one table per bit plane,
so the whole window is handled in one clock and a new output comes out every
cycle. Two configurations are provided, side by side in `da_fir_top`:

| filter | taps | sample | coefficient | table word | output | ports |
|--------|------|--------|-------------|------------|--------|-------|
| `u_fir5` | 5 | 4 bit | 5 bit | 5 bit | 8 bit | `dain`, `g[0..4]`, `dout` |
| `u_fir8` | 8 | 4 bit | 8 bit | 8 bit | 11 bit | `dain1`, `h[0..7]`, `dout1` |

Both filters share `clk` and `rst_n` and nothing else. The coefficients are
input ports, not constants, so they can be changed at run time.

## Datapath

```
 din ─┬────────────────────────────── taps[0] = x(n)
      └─[w0]─┬─────────────────────── taps[1] = x(n−1)
             └─[w1]─ … ─[w(TAPS−2)]── taps[TAPS−1]
                     │
      bit-plane transpose: plane[b][i] = taps[i][b]
                     │
   plane[0]   plane[1]   plane[2]   plane[3]
      │          │          │          │
   da_lut     da_lut     da_lut     da_lut      (coef[] feeds all four)
      │ k[0]     │ k[1]     │ k[2]     │ k[3]
   [ pipeline register on k[] (PIPELINE = 1) ]
      └──── da_shift_add: k0 + 2k1 + 4k2 + 8k3 ────► dout
```

* **`da_delay_line`** holds the last TAPS−1 samples. Tap 0 is the live input.
  A TAPS-tap window therefore costs only TAPS−1 registers: 4 for the 5-tap
  filter and 7 for the 8-tap filter.
* **`da_lut`** is one bit plane's table. The coefficients are inputs, so the
  table cannot be a ROM. Instead, every word `T(a)` is formed from the
  coefficients by adders, and the plane address selects one word. Functionally
  this is a DA memory that is refilled whenever a coefficient changes.
  Synthesis shares the adders between words (the 8-tap table is about 250
  8-bit adders).
* **`da_shift_add`** weights plane `b` by `2^b` and adds the planes.
* **`da_fir`** connects these parts. It also holds the optional pipeline
  register on the four table words.

### Worked example (8-tap filter)

Hold the input at 3 (`0011`) and set the coefficients to 5, 6, 4, 1, 13, 9, 12,
21. Once the delay line is full:

* The two low bit planes are `11111111` and the two high planes are `00000000`.
* The table words are `k = 71, 71, 0, 0`, since 71 is the sum of all eight
  coefficients.
* The output is `71 + 2·71 = 213 = 3·71`, in binary `00011010101` on the 11-bit
  output.

The testbenches check this case explicitly.

## Word widths and wrap-around

The published widths are not wide enough for every input, and this RTL keeps
them, so this section matters most when you use these filters.

* **Table word = coefficient width** (`LUT_W = COEF_W`). A plane that selects
  several large coefficients overflows its word. The sum is kept modulo
  `2^LUT_W`. In the 8-tap filter, two coefficients of 200 already wrap.
* **Output = table word + 3 bits** (`OUT_W = LUT_W + 3`). Four planes can need
  `LUT_W + 4` bits, so the output is also kept modulo `2^OUT_W`.

The result is exact only while every plane sum fits in `LUT_W` bits and the
total fits in `OUT_W` bits. If you need exact results for all inputs, set:

```
LUT_W = COEF_W + ceil(log2(TAPS))
OUT_W = LUT_W + DATA_W
```

For example, the 8-tap filter needs `LUT_W = 11` and `OUT_W = 15`.
`tb_da_fir` runs this exact variant next to the wrapping one. The widths of the
two top-level filters are in `da_fir_pkg`.

## Timing and interface

* One sample per clock on `din`, taken on the rising edge. `coef[i]`
  multiplies the sample that is `i` edges older than the newest one, so
  `coef[0]` multiplies the newest sample.
* **`PIPELINE = 1` (the default).** The four table words are registered. The
  output in the cycle after edge `n` is the result for the window
  `x(n)…x(n−TAPS+1)`, using the coefficients that were applied before edge
  `n`. The latency is one clock and the throughput is one result per clock.
  No path runs from an input straight to an output. The critical path is
  either the delay line → table → register path or the register → adders →
  output path.
* **`PIPELINE = 0`.** `dout` follows `din` and `coef` combinationally in the
  same cycle.
* **`rst_n`.** Asynchronous, active low. It clears the delay line and the
  pipeline register, so `dout` is 0 while reset is held and right after it.
* **Number format.** Samples and coefficients are unsigned. Signed
  (two's-complement) samples would need the top bit plane subtracted instead
  of added, which is not provided.

## Divided tables (`SUB_TAPS`)

An undivided table has `2^TAPS` words per bit plane. That is fine for 5 or 8
taps but impossible for 32 or 64. With `SUB_TAPS = k < TAPS`, `da_lut` splits
the taps into `ceil(TAPS/k)` groups of `k` taps. Each group gets its own table
of `2^k` words, addressed by its own address bits, and the group outputs are
added. Total table storage then grows linearly with the number of taps, at the
cost of one adder per extra group.

The default `SUB_TAPS = TAPS` gives one undivided table per plane, which is
what the two top-level filters use. `tb_da_fir_long` runs 16-, 32- and 64-tap
filters with 8-bit samples and coefficients and `SUB_TAPS = 4`.

## What departs from the reference design, and what is uncertain

* **Reset.** The reference filters have no reset port. `rst_n` is an addition.
* **Pipeline storage.** The reference 5-tap filter holds its four table words
  in latches. This RTL uses edge-triggered flip-flops. The latch enable was not
  available, so the one-clock latency is this design's own timing.
* **Coefficient order.** Coefficient `i` multiplies `x(n−i)`, the usual
  convolution order. The reference material does not show the index order, and
  the 8-tap example cannot tell the two orders apart.
* **5-tap reference waveform not reproduced.** A published waveform for the
  5-tap filter (input 0..7 with coefficients ramping each cycle) shows outputs
  38, 74, 120, 48, 50. These could not be reproduced by any reading of the
  filter that was tried, including both coefficient orders, latencies of 0 to
  2 clocks, and with and without wrap-around. The testbench uses that stimulus
  but checks the outputs against its own reference model. The 8-tap example
  above does match.
* **Not provided.** Bit-serial DA (one bit plane per clock with one table and
  an accumulator) and offset-binary-coded tables (half-size tables) are known
  DA variants and are not implemented. Signed arithmetic is not provided
  either.
* **16-, 32- and 64-tap filters.** Their word widths and table division are
  unknown. The 8-bit widths and `SUB_TAPS = 4` used in `tb_da_fir_long` are
  this design's choice.

## Files

| file | contents |
|------|----------|
| `rtl/da_fir_pkg.sv` | sizes of the two top-level filters |
| `rtl/da_delay_line.sv` | tap delay line |
| `rtl/da_lut.sv` | one bit plane's DA table, optionally divided |
| `rtl/da_shift_add.sv` | `Σ k[b]·2^b` |
| `rtl/da_fir.sv` | complete DA FIR filter (defaults: the 8-tap filter) |
| `rtl/da_fir_top.sv` | the 5-tap and 8-tap filters side by side |
| `tb/da_ref_pkg.sv` | reference arithmetic using multiplication, independent of the RTL |
| `tb/tb_da_delay_line.sv`, `tb_da_lut.sv`, `tb_da_shift_add.sv`, `tb_da_fir.sv` | unit testbenches |
| `tb/tb_da_fir_top.sv` | end-to-end test of `da_fir_top` at its default sizes |
| `tb/tb_da_fir_long.sv` | 16/32/64-tap filters with divided tables |

## Verification

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Outputs are checked every
clock cycle. The checks compare against `da_ref_pkg`, which multiplies instead
of looking up tables and reproduces the wrap-around of the narrow widths. The
pipelined outputs are checked with exactly one clock of latency.

`tb_da_fir_top` runs about 4000 cycles on both filters and counts every
mechanism of the design. It fails if any of the following was never seen:

* a reset clearing the history;
* a sample reaching the last tap;
* each bit plane selecting a non-zero table word;
* a table word wrapping;
* the output wrapping;
* an output that differs from the current window because of the pipeline
  stage.

Each unit testbench has also been run against a deliberately broken copy of
its module, and each one reported failures.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb \
    rtl/da_fir_pkg.sv tb/da_ref_pkg.sv \
    rtl/da_delay_line.sv rtl/da_lut.sv rtl/da_shift_add.sv rtl/da_fir.sv rtl/da_fir_top.sv \
    tb/tb_da_fir_top.sv --top-module tb_da_fir_top -o sim
./obj_dir/sim
```

Use the same command with another testbench file and `--top-module` to run
the others. To build a different filter, instantiate `da_fir` with your own
`TAPS`, `DATA_W`, `COEF_W`, `LUT_W`, `OUT_W`, `SUB_TAPS` and `PIPELINE`. Keep
`SUB_TAPS` small (4 to 8) for long filters, since each table has
`2^SUB_TAPS` words.
