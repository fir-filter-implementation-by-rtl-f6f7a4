# Multiplierless FIR filters from shared horizontal and vertical subexpressions

A fixed-coefficient FIR filter multiplies every input sample by each of its N
constants. In hardware the constants are written in canonic signed digit (CSD)
form, with digits 1, 0 and n (= -1) and never two nonzero digits side by side.
Each product then becomes a sum of shifted copies of the input, with one
adder for every nonzero digit beyond the first. Adders are the whole cost,
so the aim is to build any pattern of digits that occurs more than once just
one time and share it:

* A **horizontal** subexpression is a digit pattern inside one coefficient,
  for example `101` = x + x>>2. It is formed once from the input and used by
  every coefficient that contains it.
* A **vertical** subexpression is a pattern down one bit column, across
  coefficients some taps apart, for example the same digit in taps k and
  k+2: x + x[-2], where x[-d] is the input d samples earlier. It is formed
  once from the input and a short delay line.

Neither kind wins alone. In practical linear phase filters, neighbouring
coefficients differ in size, so their leading digits rarely line up and
vertical patterns are scarce. The four horizontal patterns `101`, `10n`,
`1001` and `100n` are the most common. This design therefore takes out
those horizontal patterns first, and then pairs the digits that are left
vertically. The result feeds a **transposed direct form** filter: the
shifted subexpressions are summed into one product per tap, and a chain of
registers and adders carries the partial sums to the output.

The RTL holds two such filters, the second in two coefficient wordlengths.
All three instances sit side by side in `fir_hv_top`:

| filter | taps | coefficients | adders here | direct CSD | horizontal only | vertical only |
|---|---|---|---|---|---|---|
| `fir15_hv_cse`: raised cosine GSM pulse shaping (cutoff 135.44 kHz, roll-off 0.22, fs 541.67 kHz) | 15 | 12-bit CSD | **20** | 30 | 22 | 25 |
| `fir26_hv_cse`: Parks-McClellan low-pass, band edges 0.2π / 0.25π | 26 | 8-bit CSD | **31** | 45 | 35 | 37 |
| `fir26_hv_cse #(.COEF_BITS(16))`: the same filter | 26 | 16-bit CSD | **70** | 119 | 72 | 84 |

The last three columns are published figures for other ways of building the
same coefficients. They are given for comparison and are not built here. The
published figures for the combined method are 20, 32 and 70 adders. The digit
allocations used here, described below, reach 20, 31 and 70.

## The 15-tap filter: coefficients as a digit table

The filter is symmetric, h(14-k) = h(k), and every odd tap except the centre
tap is zero. The nonzero coefficients, by digit position (a column p has
weight 2^-p):

| tap | -1 | -2 | -3 | -4 | -5 | -6 | -7 | -8 | -9 | -10 | -11 | -12 | value × 2^12 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| h(0) |   |   |   |   | 1 |   | n |   |   | 1 |   | 1 | 101 |
| h(2) |   |   |   | 1 |   | n |   |   |   |   | 1 |   | 194 |
| h(4) |   |   | 1 |   | n |   |   |   | 1 |   |   | n | 391 |
| h(6) |   | 1 |   | 1 |   |   |   |   | 1 |   |   | 1 | 1289 |
| h(7) | 1 |   |   |   |   |   |   |   |   |   |   |   | 2048 |

There are 31 nonzero digits in the 15 taps, so a direct build needs 30
adders. The sharing takes four steps:

1. **Horizontal patterns** (`hcse_gen`, 2 adders). The pairs in columns
   (5,7), (4,6), (3,5) are `10n`. The pairs in (2,4) and (10,12) are `101`:
   - x2 = x + x>>2 (`101`)
   - x3 = x - x>>2 (`10n`)
2. **Vertical patterns among the remaining digits** (`vcse_gen`, 2 adders and
   2 registers). Column 9 has a 1 in h(4) and h(6), two taps apart. Column 12
   has an n in h(4) over a 1 in h(6). By symmetry the same holds for h(8)
   and h(10):
   - x4 = x + x[-2]
   - x5 = -x + x[-2]
3. **Output equation**. With [-k] meaning k samples of delay:

   ```
   y = x3>>5 + x2>>10 + x3[-2]>>4 + x[-2]>>11 + x3[-4]>>3 + x4[-4]>>9 + x5[-4]>>12
     + x2[-6]>>2 + x[-7]>>1 + x2[-8]>>2 + x4[-8]>>9 - x5[-8]>>12
     + x3[-10]>>3 + x3[-12]>>4 + x[-12]>>11 + x3[-14]>>5 + x2[-14]>>10
   ```

   The equation has 17 terms, so 16 adders sum them. Step 2 stores the
   digits of two taps in one term: x4[-4] carries the column-9 digits of
   both h(4) and h(6). The product of tap 6 is therefore only x2>>2, and tap
   10 is only x3>>3.
4. **Total**: 2 + 2 + 16 = **20 adders**.

## Transposed adder line (`tdf_output`)

This is the part that takes the most care to read. The terms of the output
equation are grouped by their delay k into a tap product P_k, formed from the
*current* subexpressions only:

| k | P_k (at the 2^12 scale, see below) | adders in P_k |
|---|---|---|
| 0, 14 | x3>>5 + x2>>10 | 1 each |
| 2, 12 | x3>>4 + x>>11 | 1 each |
| 4 | x3>>3 + x4>>9 + x5>>12 | 2 |
| 6 | x2>>2 | 0 |
| 7 | x>>1 | 0 |
| 8 | x2>>2 + x4>>9 - x5>>12 | 2 |
| 10 | x3>>3 | 0 |
| 1, 3, 5, 9, 11, 13 | 0 | no stage adder |

The chain registers z_1 .. z_14 hold the partial sums:

```
z_14 <= P_14
z_k  <= z_(k+1) + P_k        (just z_(k+1) where P_k = 0)
y    =  z_1 + P_0            (registered into y_out)
```

The adders sit at k = 0, 2, 4, 6, 7, 8, 10 and 12: eight on the chain and
eight inside the products. A delayed term such as x4[-4] needs no delay of
its own, because the partial sum it enters is delayed four more times on the
way to y. The vertical subexpressions are the one place where the input
itself is delayed: x4 and x5 need x[-2], held in the two input registers of
`vcse_gen`.

### Exact arithmetic

The right shifts of the equation would drop bits. The RTL works at a scale of
2^12 instead, so a term `x >> s` is built as `x << (12 - s)`. x2 and x3 are
produced as 4·x2 = 5x and 4·x3 = 3x (ports `x2s`, `x3s`) so that their own
">>2" is exact too. They are shifted two places less. The output is the exact
integer Σ h(k)·2^12 · x(n-k). The sum of coefficient magnitudes is
5998/4096 < 2, so W_IN + 13 bits hold any result with no overflow. Rounding
the output to a shorter word is left to the user.

### Coefficient signs (`TRUE_SIGNS`)

The digit table above, and the equation, are drawn with every coefficient
positive, which is the usual convention for this kind of table. The real
raised cosine sampled at two samples per symbol has h(4) and h(0) negative,
and their mirrors h(10) and h(14). This follows from the raised cosine
formula at t = 1.5 T and 3.5 T. The magnitudes 391 and 101 agree with it.

* `TRUE_SIGNS = 0` (default) builds the equation exactly as drawn.
* `TRUE_SIGNS = 1` builds the actual raised cosine. Negating h(4) while
  keeping h(6) flips the sign relation between their digits. Column 9 then
  needs x5 and column 12 needs x4: the two vertical subexpressions swap
  columns. The negative products are subtracted on the chain, and z_14
  holds +|P_14|, which the adder at tap 12 subtracts. The subexpressions are
  the same and so is the adder count, 20.

## The 26-tap filter (`fir26_hv_cse`)

This is a Parks-McClellan low-pass with pass-band edge 0.2π and stop-band
edge 0.25π. Its real-valued coefficients h(0..12) are in
`tb/fir26_ref_pkg.sv`, with h(25-k) = h(k). Each magnitude is truncated to 8
fractional bits, and the coefficient keeps its sign:

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| h(k)·2^8 | -2 | 19 | 8 | 3 | -2 | -8 | -11 | -9 | 0 | 14 | 31 | 47 | 56 |

Sharing:

* **Horizontal** (`hcse4_gen`, 4 adders): all four common patterns, aligned
  to their lower digit: s101 = 5x, s10n = 3x, s1001 = 9x, s100n = 7x. They
  are used as follows:
  - `101` in h1
  - `10n` in h3, h6 and h11
  - `1001` in h7
  - `100n` in h9 and h12
* **Vertical** (`vcse26_gen`, 2 adders, 4 input registers):
  - v10001 = x + x[-4]. It pairs the column-7 digits of taps 0/4 and
    21/25, and the column-8 digits of taps 10/14 and 11/15.
  - v100n = x - x[-3]. It pairs the column-5 digits of taps 2/5 and 20/23.
* **Output** (`tdf26_output`, 25 adders): the 26 remaining terms in a
  transposed chain z_1..z_24, built like the 15-tap one. The tap products
  are listed in the file header.

Total: 4 + 2 + 25 = 31 adders. The output is Σ h(k)·2^8 · x(n-k), exact,
in W_IN + 9 bits (Σ|h|·2^8 = 420).

### 16-bit coefficients (`COEF_BITS = 16`, `tdf26_16_output`)

With 16 fractional bits the coefficients are

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| h(k)·2^16 | -611 | 4999 | 2054 | 900 | -621 | -2201 | -3067 | -2503 | -178 | 3645 | 8139 | 12106 | 14433 |

They have 120 nonzero CSD digits, so a direct build needs 119 adders. Here
the horizontal pairs are chosen per coefficient to cover as many digits as
possible: 50 pairs of kind `101`, `10n` and `100n`. The leftover digits are
then paired down their columns, using the same two vertical
subexpressions as the 8-bit set:

* x + x[-4] in column 7 (taps 0/4 and 21/25);
* x - x[-3] in column 5 (taps 2/5 and 20/23).

Twelve single digits remain, for 66 terms in all. The chain therefore needs
65 adders. The subexpressions need 3 horizontal adders (the `1001` output of
`hcse4_gen` goes unused and is removed by synthesis) and 2 vertical ones.
That makes **70**. In `tdf26_16_output`, every chain line lists the
patterns it adds.

Every term of tap 25 (h(0) < 0) is negative. So z_25 holds the *negated*
partial sum, and the adder at tap 24 subtracts it. This costs no extra
negation. The output is exact in W_IN + 17 bits (Σ|h|·2^16 = 110914).

## Interface and timing

Each filter (`fir15_hv_cse`, `fir26_hv_cse`) has the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous, active-low: clears every delay and chain register |
| in_valid | in | 1 | sample strobe: x_in is taken on this clock |
| x_in | in | W_IN | signed input sample |
| out_valid | out | 1 | high on the clock after each accepted sample |
| y_out | out | W_IN+13 (15-tap) / W_IN+9 (26-tap) | exact output, scaled by 2^12 / 2^8 |

`y_out` holds its value until the next accepted sample. The filters can take
a sample on every clock. With `in_valid` low they hold their state, so a fast
clock can serve a slow sample rate (541.67 kHz for the GSM filter). There is
one register between the products and `y_out`. The adder chain from `x_in`
through the subexpressions and P_0 into that register is the critical path.
No further pipelining is done.

`fir_hv_top` holds the 15-tap filter and the 26-tap filter with 8-bit and
with 16-bit coefficients. They share `clk` and `rst_n`, and their other
ports are prefixed `f15_`, `f26_` and `f26w_`. Its parameters are `W_IN`
(default 16) and `F15_TRUE_SIGNS` (default 0). `fir26_hv_cse` alone takes
`COEF_BITS` = 8 (default) or 16.

## Files

| file | contents |
|---|---|
| `rtl/fir_hv_pkg.sv` | default width, coefficient fraction bits, word growth |
| `rtl/hcse_gen.sv` | 15-tap horizontal subexpressions 101, 10n |
| `rtl/vcse_gen.sv` | 15-tap vertical subexpressions x ± x[-2] |
| `rtl/tdf_output.sv` | 15-tap products and transposed chain |
| `rtl/fir15_hv_cse.sv` | 15-tap filter |
| `rtl/hcse4_gen.sv` | the four horizontal patterns (uses `hcse_gen`) |
| `rtl/vcse26_gen.sv` | 26-tap vertical subexpressions x + x[-4], x - x[-3] |
| `rtl/tdf26_output.sv` | 26-tap products and transposed chain, 8-bit coefficients |
| `rtl/tdf26_16_output.sv` | the same for 16-bit coefficients |
| `rtl/fir26_hv_cse.sv` | 26-tap filter (`COEF_BITS` selects the chain) |
| `rtl/fir_hv_top.sv` | all three filter instances |
| `tb/fir15_ref_pkg.sv`, `tb/fir26_ref_pkg.sv` | reference coefficients for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fir15_raised_cosine`, `tb_fir26_16bit` and `tb_fir26_response` |

## Verification

Every testbench compares the RTL with values it works out independently:

* The 15-tap reference rebuilds each coefficient from its list of CSD digits.
* The 26-tap reference derives each coefficient from its real value by
  truncation. Neither reference knows how the digits are shared.
* The block testbenches for the product/chain modules form the
  subexpressions themselves, such as 5x or x + x(n-4).

The filter-level testbenches check:

* every clock: `out_valid` is high exactly one clock after each accepted
  sample, and `y_out` equals the convolution;
* the impulse response against the coefficient list;
* full-scale steps, and a worst-case sequence that drives the output to
  Σ|h|·32767, its largest possible magnitude;
* random samples with random gaps in `in_valid`;
* a reset in the middle of a stream.

Each of these events is counted, and a testbench fails if one never
happens. Each testbench prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog if it hangs. `tb_fir_hv_top` runs all three filters
at the default parameters. `tb_fir15_raised_cosine` runs the
`TRUE_SIGNS = 1` build, `tb_fir26_16bit` runs the 16-bit 26-tap filter on
its own, and `tb_tdf_output` checks both sign options.

`tb_fir26_response` checks that the 26-tap filter really is a low-pass
filter, for both coefficient widths. It feeds steady sines at 0.1π, 0.2π,
0.4π and 0.5π and checks every output sample exactly. It then measures the
gain by correlating 200 settled outputs with sin and cos. The gain must
match |H(ω)| of the quantised coefficients to within 0.01. It must also be
above 0.8 in the pass band and below 0.06 at 0.4π and 0.5π. Measured gains
are 0.88/0.84 (8-bit) and 0.90/0.87 (16-bit) at 0.1π/0.2π, and about 0.04
in the stop band.

To run one (from the folder that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fir_hv_pkg.sv tb/fir15_ref_pkg.sv tb/fir26_ref_pkg.sv \
  tb/tb_fir_hv_top.sv --top-module tb_fir_hv_top -o sim
./obj_dir/sim
```

Replace `tb_fir_hv_top` with any other `tb_*` module. Each run takes well
under a second.

## Where this RTL departs from, or goes beyond, the method's description

* **Input width** (16 bits), the sample strobe, the output register and the
  synchronous reset are choices made here. The method fixes none of them.
* **Exact output.** No rounding or truncation is applied; see above.
* **Coefficient signs** of the 15-tap filter: the default follows the
  all-positive drawing. `TRUE_SIGNS = 1` is an addition here.
* **26-tap digit allocation.** The method states which pattern types are
  shared (horizontal 101/10n/1001/100n, then vertical 1001, 100n and
  10001). It does not state which digits are paired. The allocations above
  are this design's own. They reach 31 adders (published: 32) for 8-bit
  and 70 adders (published: 70) for 16-bit coefficients, and they need no
  vertical `1001`.
* **26-tap coefficient quantisation.** Each magnitude is truncated to 8 or
  16 fractional bits and keeps its sign. This reproduces the published CSD
  digits.
* **Not built:** the 219-tap Parks-McClellan filter that the method has also
  been applied to (published at 337 adders, against 386 for vertical sharing
  alone). Its coefficients are not given.
* **Changing coefficients** means redoing the allocation by hand. The
  subexpressions, the tap products and the chain are written out explicitly,
  so the structure can be read directly against the tables above.
