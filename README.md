# HPS log2: a binary logarithm built from two parabolas

This is a small, table-light hardware unit for `log2` at about 16 bits of
accuracy. It takes an operand in a simple floating-point form, `2^e * v` with
`1 <= v < 2`. Since `log2(2^e * v) = e + log2(v)`, the exponent passes straight
through as the integer part of the result. Only the mantissa needs
approximating, and the problem reduces to

    y ~ log2(1 + x),   0 <= x < 1,   x = v - 1 (14 bits),  y: 17 fraction bits

The approximation follows the *Harmonized Parabolic Synthesis* method
(E. Hertz, J. Lai, B. Svensson, P. Nilsson). It does not add polynomial terms.
It multiplies two factors:

    y = s1(x) * s2(x)

* `s1(x) = x + c1*(x - x^2)` is a single parabola over the whole range. For
  log2 the coefficient is chosen as `c1 = 0`, so **`s1(x) = x`** and costs no
  hardware.
* `s2(x)` approximates the "help function" `log2(1+x)/x`, which is smooth and
  runs from `1/ln 2 = 1.4427` down to `1`. It uses a second-degree
  interpolation over `I = 2^w = 8` equal intervals:

      s2 = l2,i + j2,i * x_w - c2,i * x_w^2
      i   = the top 3 bits of x           (interval index)
      x_w = the low 11 bits of x = frac(8x)   (position inside the interval)

The two factors are designed together. `s1` is kept trivial, and all the
shaping lives in 3 x 8 coefficients that were tuned after truncation. The
tuning centres the error on zero and gives it a near-normal distribution,
instead of the one-sided bias that plain truncation leaves.

## Datapath

```
            x[13:0] (14) ─────────────────────────── s1 = x ────────┐
               │                                                    │
      i = x[13:11] (3)            x_w = x[10:0] (11)                │
               │                        │                           │
      ┌────────┼─────────┐       ┌──────┴──────┐                    │
      ▼        ▼         ▼       ▼             ▼                    │
   |c2,i|(9) l2,i(17) |j2,i|(12) squarer      (x_w)                 │
      │        │         │       │ x_w^2 (9)   │                    │
      └──► × ◄─┼─────────┼───────┘             │                    │
           │   │         └──────────► × ◄──────┘                    │
           │   │                      │ (17)                        │
           │   └──────────────► l2 - (j-product)  (17, mod 2^17)    │
           │ (17)                     │                             │
           └────────────────────► + c-product     (17, mod 2^17)    │
                                      │ s2 (17, integer 1 implied)  │
                                      └───────────► × ◄─────────────┘
                                                    │
                                                 y (17)
```

Word lengths of every bus:

| signal            | bits | format | weight of LSB | notes                                        |
|-------------------|------|--------|---------------|----------------------------------------------|
| `x`               | 14   | U0.14  | 2^-14         | mantissa fraction                            |
| `i`               | 3    | —      | —             | interval index                               |
| `x_w`             | 11   | U0.11  | 2^-11         |                                              |
| `x_w^2`           | 9    | U0.9   | 2^-9          | top 9 bits of the 22-bit square, floor       |
| `l2,i`            | 17   | U1.17  | 2^-17         | integer bit is always 1, not stored          |
| `|j2,i|`          | 12   | U0.15  | 2^-15         | 3 leading zero bits and the sign not stored  |
| `|c2,i|`          | 9    | U0.16  | 2^-16         | 7 leading zero bits and the sign not stored  |
| `|j2|*x_w`        | 17   |        | 2^-17         | 23-bit product >> 9, floor                   |
| `|c2|*x_w^2`      | 17   |        | 2^-17         | 18-bit product >> 8, floor                   |
| `s2`              | 17   | U1.17  | 2^-17         | integer bit always 1, not stored             |
| `y`               | 17   | U0.17  | 2^-17         | `(x * s2) >> 14`, floor                      |

The bus widths are those of the published log2 design. The binary points are
not stated there. They were set so that the published decimal coefficients
are exact on their grids. With these points the unit reproduces the published
error statistics to every printed digit (see *Accuracy*), which makes this
reading very likely the intended one.

Three details take some care to follow:

1. **Fixed signs.** Every `j2,i` and every `c2,i` is negative. The tables hold
   magnitudes only, so 12 and 9 bits are enough. The sign goes into the adders
   instead: `s2 = l2 - |j2|*x_w + |c2|*x_w^2`. This is the same as
   `l2 + j2*x_w - c2*x_w^2`.
2. **Implied integer 1, modulo adders.** `s2` always lies in `[1, 1.443)`, so
   only its 17 fraction bits are carried. At the end of interval 7 the partial
   sum `l2 - |j2|*x_w` dips slightly below 1. Its lowest value is
   `1 - 212*2^-17`, and its fraction would be negative. Both adders are 17 bits
   wide and wrap modulo 2^17. The final `s2` is back in range, so the wrapped
   result is exact. Do not widen or saturate these adders "to be safe": that
   changes nothing, and a saturating adder would be wrong.
3. **Final multiplier.** Because `s2 = 1 + s2_frac`, the product is
   `x*s2_frac + (x << 17)`: a 14 x 17 multiplier plus one add. The result is
   then truncated to 17 fraction bits. `y` never reaches 1.0; its largest value
   is `131066 * 2^-17`.

### The squarer

Only `x_w^2` is needed, and only its top 9 bits. `hps_squarer` uses the folded
partial-product form of a squarer. The diagonal terms `a_i*a_i` reduce to
`a_i` at weight `2^(2i)`. Each pair `a_i*a_j` with `i < j` appears once at
weight `2^(i+j+1)`. That is about half the partial products of a general
multiplier. The full 22-bit sum is formed and then truncated, so the 9 output bits are
exactly `floor(x_w^2 / 2^13)`.

## Coefficients

| i | interval of x  | l2,i                | j2,i              | c2,i                 |
|---|----------------|---------------------|-------------------|----------------------|
| 0 | [0, 1/8)       | 1.44268798828125000 | -0.089294433593750 | -0.0060424804687500 |
| 1 | [1/8, 2/8)     | 1.35939788818359375 | -0.076629638671875 | -0.0049438476562500 |
| 2 | [2/8, 3/8)     | 1.28771209716796875 | -0.066589355468750 | -0.0040435791015625 |
| 3 | [3/8, 4/8)     | 1.22514343261718750 | -0.058471679687500 | -0.0032501220703125 |
| 4 | [4/8, 5/8)     | 1.16991424560546875 | -0.051849365234375 | -0.0026397705078125 |
| 5 | [5/8, 6/8)     | 1.12069702148437500 | -0.046447753906250 | -0.0022277832031250 |
| 6 | [6/8, 7/8)     | 1.07646942138671875 | -0.041900634765625 | -0.0018920898437500 |
| 7 | [7/8, 1)       | 1.03644561767578125 | -0.038085937500000 | -0.0016479492187500 |

These are the published, truncation-optimised values, and they are not the
textbook interpolation coefficients. For reference, the untuned starting point
for interval `i` over the help function `h(x) = log2(1+x)/x` is:

    l2,i = h(x_start)            (l2,0 = 1/ln 2, the limit at x = 0)
    k2,i = h(x_end) - h(x_start)
    c2,i = 4 * (h(x_middle) - l2,i - k2,i / 2)
    j2,i = k2,i + c2,i

The final values were then adjusted by hand, together with the word lengths,
to centre the error after truncation. Other coefficient sets do not
necessarily reach the same error distribution.

The architecture is generic. A different unary function needs only new
contents in the three tables, provided its help function keeps the same signs
and magnitude ranges (or the sign handling is changed) and the word lengths
are re-checked.

## Accuracy

An exhaustive sweep of all 16384 mantissas, against `log2(1+x)` computed in
double precision:

| metric             | value          |
|--------------------|----------------|
| max absolute error | 1.5897615e-5 (= 2^-15.94) |
| mean error         | 1.948e-8       |
| median error       | -2.5005e-8     |
| standard deviation | 4.737652e-6    |
| RMS error          | 4.737692e-6    |

The maximum and RMS errors match the published figures of the reference
implementation to every printed digit. The mean and median are both below
2^-25. The standard deviation is equal to the RMS error, which shows that the
error is centred on zero.

## Timing and pipelining

* `PIPELINED = 0` (default) is a purely combinational unit. Results follow the
  operand within the same cycle, and `clk`/`rst_n` are unused. This is the
  configuration whose area, delay and energy were published (a 7 ns critical
  path in a 65 nm process).
* `PIPELINED = 1` adds two register stages. The first sits after the two `s2`
  multipliers. The second sits in front of the final multiplier, which is the
  largest one and sets the clock period. Latency is 2 clocks and throughput is
  one result per clock. The exponent and `in_valid` are delayed to match.
  `out_valid` is reset asynchronously by `rst_n` (active low). Data registers
  are not reset.

There is no back-pressure: the unit always accepts an operand.

## Modules

| module          | role                                                                   |
|-----------------|------------------------------------------------------------------------|
| `hps_pkg`       | word lengths, shift amounts and types                                  |
| `hps_log2`      | top: exponent/mantissa in, `{integer, fraction}` out, optional pipeline |
| `hps_log2_core` | processing: split into `i`/`x_w`, squarer, `s2`, `s1 = x`, final multiplier |
| `hps_s2`        | second sub-function: three tables, two multipliers, two modulo adders  |
| `hps_squarer`   | folded partial-product squarer, keeps the top `OUT_W` bits             |
| `hps_lut_l2`, `hps_lut_j2`, `hps_lut_c2` | 8-entry coefficient tables                    |

Top-level ports of `hps_log2` (`EXP_W = 8` by default):

| port        | dir | width  | meaning                                            |
|-------------|-----|--------|----------------------------------------------------|
| `clk`       | in  | 1      | clock (pipelined build only)                       |
| `rst_n`     | in  | 1      | asynchronous active-low reset of the valid bits    |
| `in_valid`  | in  | 1      | operand valid                                      |
| `in_exp`    | in  | EXP_W  | signed exponent `e`                                |
| `in_mant`   | in  | 14     | mantissa fraction: `v = 1.in_mant`                 |
| `out_valid` | out | 1      | result valid                                       |
| `out_int`   | out | EXP_W  | integer part of `log2` (equals `e`)                |
| `out_frac`  | out | 17     | fraction of `log2`, U0.17                          |

`{out_int, out_frac}` read as a two's complement number with 17 fraction bits
is the logarithm. For example, `e = -3, v = 1.5` gives `-3 + 0.58496`.

## Design choices not fixed by the method's description

* The exponent width (8 bits, signed), the valid signals and the reset.
* The binary points listed above, and floor truncation everywhere. Both are
  confirmed by the exact match of the error statistics.
* Storing `|j2|` and `|c2|` as magnitudes with fixed negative signs.
* The position of the first pipeline register, and offering the pipeline as an
  option at all. The published measurements are for the unpipelined design.
* The squarer's internal structure. Only its function and its 11-bit input and
  9-bit output are fixed.
* The coefficients are taken from their decimal values. They lie exactly on
  the 2^-17, 2^-15 and 2^-16 grids.

Not included: the general first sub-function with `c1 != 0` (its
`x - x^2` branch, the `c1` multiplier and the adder), because log2 uses
`c1 = 0`. Also not included: coefficient sets for other functions (for
example sine), since no values for them are available.

## Simulation

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
The expected values come from `tb/hps_ref_pkg.sv`, which recomputes each
fixed-point step from the decimal coefficients independently of the RTL.

| testbench            | what it covers                                                          |
|----------------------|-------------------------------------------------------------------------|
| `tb_hps_lut_*`       | every table entry against the decimal coefficients                      |
| `tb_hps_squarer`     | all 2048 inputs at 11/9 bits, and a 5/7-bit instance                    |
| `tb_hps_s2`          | all 16384 `(i, x_w)` pairs, combinational and 1-clock pipelined         |
| `tb_hps_log2_core`   | all 16384 operands bit-exact, the error statistics, 2-clock latency with random gaps |
| `tb_hps_log2`        | random signed exponents and mantissas through both builds of the top; counts every interval, the exponent signs, pipeline bubbles and back-to-back issue |
| `tb_hps_log2_full`   | the default top over all 16384 mantissas, with max and RMS error checks |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/hps_pkg.sv tb/hps_ref_pkg.sv rtl/*.sv tb/tb_hps_log2_full.sv \
  --top-module tb_hps_log2_full -Mdir obj_full
./obj_full/Vtb_hps_log2_full
```

Each testbench finishes in well under a second.
