# Multiplier-free approximate square and square root

This unit computes an approximate A² or √A of an unsigned integer A without a
multiplier, a divider or an iterative square-root loop. It works in the base-2
logarithm domain, where both operations collapse to a one-bit shift:

    log2(A²)  = 2 · log2(A)        (shift the logarithm one place up)
    log2(√A)  = log2(A) / 2        (shift the logarithm one place down)

The cost moves into two converters, binary → logarithm and logarithm → binary.
Each converter approximates its curve on [0,1) with eight straight lines of equal
width. Every slope is 1 plus or minus a few powers of two, so a line costs a
handful of shifted copies of the input, an adder tree and one constant. The
result is a purely combinational datapath: a leading-one detector, two banks of
shift-and-add lines, a few multiplexers and two barrel shifters.

The default size is a 32-bit operand with a 12-bit logarithm fraction. The same
RTL at N = 16 is the second configuration.

## Data path

```
 a[N-1:0] ──► log_conv ───────────────► log_shift ──────────► antilog_conv ──► y
              lod: k = leading one       square: {k,f} << 1    antilog_frac: m = 2^f
              normalise: f = bits        sqrt:   {k,f} >> 1    y = m << k
                after the leading one                          (0 if a == 0)
              log_frac: log2(1+f)
```

1. **Logarithm (`log_conv`).** Write A = 2^k · (1+f). The leading-one detector
   (`lod`) gives k. Shifting A left by N-1-k puts the leading one at the top.
   The next 12 bits are f: extra bits are dropped, and missing ones (small A)
   are zero. `log_frac` replaces f by an approximation of log2(1+f). The
   logarithm is the fixed-point word {k, log2(1+f)}, with 5 integer bits and 12
   fraction bits at N = 32.
2. **Shift (`log_shift`).** For the square, the 17-bit word moves one place
   towards the MSB. The top fraction bit becomes the LSB of a 6-bit
   characteristic. For the square root it moves one place towards the LSB. The
   characteristic's LSB becomes the top fraction bit and the fraction's LSB is
   lost. This stage is only wiring and a 2:1 multiplexer.
3. **Antilogarithm (`antilog_conv`).** `antilog_frac` turns the 12-bit fraction
   into a mantissa 2^f in [1,2), held as 1.12 fixed point. The mantissa is
   shifted left by the characteristic into the result word.

### Number formats

| signal | format | range |
|---|---|---|
| `a` | unsigned integer, N bits | 0 … 2^N − 1 |
| logarithm `{lg_k, lg_f}` | unsigned, clog2(N) integer + FW fraction bits | 0 … N − 1 + (1 − 2^-FW) |
| shifted logarithm `{k2, f2}` | clog2(N)+1 integer + FW fraction bits | 0 … 2N − 1 + … |
| mantissa `m` | 1.FW | [1, 2) |
| `y` | unsigned, 2N integer + FW fraction bits (value = y / 2^FW) | square of any N-bit A fits |

At the default size, `y` is 76 bits wide (Q64.12). A square-root result uses
only the low integer bits, but it keeps the 12 fraction bits, so √A comes out
with sub-integer resolution.

## The eight-segment converters

Both converters share one form. The top three bits of the 12-bit fraction f
choose segment s, which covers [s/8, (s+1)/8). On that segment:

    y = f · (1 + C[s]/256) + B[s] / 2^14

| s | range | log2(1+f): C | log2(1+f): B | 2^f: C | 2^f: B |
|---|---|---|---|---|---|
| 0 | [0, 1/8) | +92 | 0 | −71 | 16386 |
| 1 | [1/8, 2/8) | +55 | 296 | −54 | 16252 |
| 2 | [2/8, 3/8) | +24 | 792 | −36 | 15966 |
| 3 | [3/8, 4/8) | 0 | 1380 | −16 | 15489 |
| 4 | [4/8, 5/8) | −20 | 2032 | +6 | 14786 |
| 5 | [5/8, 6/8) | −36 | 2668 | +30 | 13826 |
| 6 | [6/8, 7/8) | −52 | 3432 | +56 | 12578 |
| 7 | [7/8, 1) | −64 | 4096 | +84 | 11008 |

The coefficients live in `lsq_pkg` (`LOG_C`, `LOG_B`, `ALOG_C`, `ALOG_B`). They
were fitted so that each slope correction has few set bits. For example, 92 =
64+16+8+4 gives f·92/256 = f>>2 + f>>4 + f>>5 + f>>6.

`pwl_seg` builds one line. For each set bit i of |C| it adds `f >> (8−i)`, then
adds that sum to f or subtracts it. Then it adds the offset B. All of this is
done with max(FW,14)+8 fraction bits, so no term loses a bit. Only the final
sum is cut down to FW bits, by truncation. `log_frac` and `antilog_frac` each
build all eight lines side by side and select one with the three segment bits.
Nothing in the datapath multiplies two variables.

Measured accuracy of the converters over all 4096 fractions at FW = 12:

* log2(1+f): the error (approximation − exact) lies between −2.50·10⁻³ and
  +1.8·10⁻⁵. Truncating to 12 bits widens this to −2.74·10⁻³. The line fit never
  overshoots by more than that tiny amount, so the logarithm is almost always
  slightly low.
* 2^f: the relative error lies between −0.0066 % and +0.0975 % before
  truncation, and between −0.022 % and +0.097 % after it.

## Accuracy of the square and the square root

A logarithm error δ becomes 2δ after the square and δ/2 after the square root,
and then passes through the exponential. The square is therefore the less
accurate of the two operations. It is nearly always low, because the logarithm
is. Exhaustive results over all 65535 nonzero 16-bit operands:

| mode | max. relative error | MRED (mean relative error) | MSE of relative error |
|---|---|---|---|
| square | 0.41 % | 0.137 % | 2.6·10⁻⁶ |
| square root | 0.114 % | 0.030 % | 1.3·10⁻⁷ |

For 32-bit operands, about 20,000 operands of every bit length gave a
square error in −0.39 % … +0.09 % and a square-root error in −0.11 % … +0.09 %.

Worked example, A = 3 (binary 11): k = 1 and f = 0.5, which is segment 4 of the
logarithm table. The logarithm is 1.95C hex (1.58496). Doubled it is 3.2B8:
k = 3, f = 0x2B8, segment 1 of the antilog table, mantissa 1.204 hex. The square
is 1.204 hex · 8 = 9.0078125. Halved, the logarithm is 0.CAE: segment 6,
mantissa 1.BBC hex, so √3 ≈ 1.7334 (exact 1.7321).

## Interface and timing

`lsq_top #(N = 32, FW = 12)`

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | N | operand, unsigned |
| `mode` | in | `lsq_pkg::mode_e` | `MODE_SQUARE` (0) or `MODE_SQRT` (1) |
| `y` | out | 2N+FW | result, unsigned fixed point, value = y / 2^FW |

The unit has no clock, reset or handshake. `y` follows `a` and `mode` after one
combinational delay. To pipeline it, put registers around it, or between
`log_conv`, `log_shift` and `antilog_conv`, which are the natural cut points.
For A = 0 the logarithm does not exist. The leading-one detector's nonzero flag
travels with the logarithm and forces `y` to 0.

## Design choices and known departures

* **Combinational only.** The method is defined as one combinational path. No
  register stages are added.
* **One unit, two modes.** A single datapath with a `mode` input does both
  operations. The only hardware that differs between the modes is the wiring of
  the shift stage.
* **Shift direction names.** The square doubles the logarithm and the square
  root halves it. Descriptions of this method sometimes call the square's step
  a "right shift" and the square root's a "left shift". The RTL follows the
  arithmetic, not those names.
* **Truncation everywhere.** The input fraction after the leading one, each
  converter output and the bit lost when halving are all truncated, never
  rounded. This biases results slightly low. Rounding at the converter outputs
  would centre the error, at the cost of an incrementer.
* **√3 in the worked example.** With the coefficient table above, √3 evaluates
  to 1.7334 (1.BBC hex). A value of 1.7351 (1.BC3 hex) has also been given for
  this example. It is not consistent with the table, and it would exceed the
  antilog error bound, so the table is taken as authoritative.
* **Leading-one detector.** A plain priority scan is used. Any faster
  tree-structured leading-one detector can be dropped in with the same ports.
* **Widths not fixed by the method.** The characteristic width is clog2(N). The
  result keeps 2N integer bits, which every square fits, and FW fraction bits.
  FW = 12 matches the 12-bit fraction of the worked example. A larger FW gives a
  finer result, but the accuracy stays bounded by the coefficient fit: about
  2.5·10⁻³ in the logarithm. With N = 16 and FW = 16, for instance, the
  exhaustive square error drops only from 0.41 % to 0.33 % (MRED 0.108 %).
* **Zero operand** returns zero, as described above.

## Files

| file | contents |
|---|---|
| `rtl/lsq_pkg.sv` | `mode_e`, segment count and units, both coefficient tables |
| `rtl/lod.sv` | leading-one detector |
| `rtl/pwl_seg.sv` | one shift-and-add line segment (helper) |
| `rtl/log_frac.sv` | eight-segment log2(1+f) |
| `rtl/log_conv.sv` | binary → logarithm converter |
| `rtl/log_shift.sv` | square / square-root shift in the log domain |
| `rtl/antilog_frac.sv` | eight-segment 2^f |
| `rtl/antilog_conv.sv` | logarithm → binary converter |
| `rtl/lsq_top.sv` | complete unit |
| `tb/lsq_ref_pkg.sv` | reference models used by the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `lsq_error16_tb` |

Each testbench checks results bit for bit against `lsq_ref_pkg`. That package
restates the coefficients on its own and evaluates the lines with ordinary
multiplication, so it is independent of the shift-and-add structure. Most
testbenches also check against the exact real-valued function within the error
bands given above.

* `lsq_top_tb` runs the unit at its default size. It covers the worked example,
  zero, small operands, powers of two and their neighbours, and random operands
  of every length. It also counts the events it meant to produce: both modes,
  the zero operand, all eight segments of each converter, a square whose doubled
  fraction carries into the characteristic, and a square root of an odd
  characteristic. It fails if any of them never occurred.
* `lsq_error16_tb` is the exhaustive 16-bit accuracy run whose figures appear
  above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lsq_pkg.sv tb/lsq_ref_pkg.sv tb/lsq_top_tb.sv --top-module lsq_top_tb
./obj_dir/Vlsq_top_tb
```

Replace `lsq_top_tb` with any other testbench name. Each run ends with a line
`TB_RESULT checks=<n> failures=<m>`. All testbenches finish in well under a
second.

## Changing it

* **Operand width:** set `N` on `lsq_top`. Every internal width follows from it.
* **Precision:** set `FW`. The converters keep their internal guard bits
  automatically. The testbenches' hex constants for the worked example assume
  FW = 12.
* **Coefficients:** edit the tables in `lsq_pkg`, keeping |C| < 256 and
  B < 2^15. Update the independent copy in `tb/lsq_ref_pkg.sv` to match.
  Because each line's slope is a constant, synthesis builds only the adders its
  set bits require.
