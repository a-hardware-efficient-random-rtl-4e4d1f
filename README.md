# Floating point inversion RNG for nonuniform distributions

This is synthesizable SystemVerilog for a random number generator that turns
uniformly distributed bit vectors into samples of an arbitrary distribution
by the inversion method, `y = icdf(x)`. What makes it small is how it reads
its input. The uniform bit vector is not treated as a fixed point number in
(0, 1). It is treated as a small floating point number. The exponent is the
count of leading zeros, and it selects an *octave* of the inverse CDF
directly. A few mantissa bits pick a *subsection* inside the octave. The
remaining mantissa bits are the argument of a linear polynomial whose two
coefficients come from a ROM. Address generation needs no shifter and no
wide leading-zero counter. The only arithmetic is one multiply-add (a
25x18 multiplier with a 48-bit adder, the size of one FPGA DSP slice), plus
a negation for the mirrored half of a symmetric distribution.

The floating point view also gives a much finer resolution near x = 0, which
is where the tails of a distribution come from. When the exponent part of a
vector is all zero, the generator consumes further vectors and keeps
counting, up to an exponent of 54. So uniform values down to about 2^-56 can
be reached, and normal samples out to about ±8.4σ, from a 32-bit source.

The default table is the standard normal distribution. The hardware itself
is distribution-agnostic: another table file gives another distribution.

## Structure

```
 uniform RNG (external) ──rn_i[31:0], rn_valid_i──►  fp_converter  ──{symm, part, exp, mant}, data_valid──►  icdf_lookup ──► y_o, y_valid_o
                                                      └ lzc (comparator tree)                                  ├ offset mux + adder (section address)
                                                                                                                ├ coeff_rom   {c0, c1}
                                                                                                                ├ mac_unit    c0 + c1·t
                                                                                                                └ sign stage  ×(−1) if symm
```

| file | role |
|---|---|
| `rtl/nurng_pkg.sv` | default configuration constants and width helpers |
| `rtl/lzc.sv` | leading-zero counter built as a level-by-level comparator tree |
| `rtl/fp_converter.sv` | uniform vector → floating point number, with the multi-vector exponent loop |
| `rtl/coeff_rom.sv` | coefficient memory, `$readmemh`-initialised, synchronous read |
| `rtl/mac_unit.sv` | `c0 + c1 * t`, one register stage |
| `rtl/icdf_lookup.sv` | address generation, ROM, MAC, symmetry |
| `rtl/nurng_top.sv` | the complete generator |
| `rtl/icdf_normal.hex` | the standard normal table (464 words) |
| `tb/icdf_laplace.hex` | a Laplace table, used by `tb/nurng_dist_tb.sv` |

The uniform source is not part of the RTL. Any generator that delivers M-bit
vectors will do, for example a Mersenne Twister.

## The floating point number

An M-bit input vector is split, from MSB to LSB, into four fields:

| field | width (default) | use |
|---|---|---|
| symmetry | 1 | which half of a symmetric ICDF the sample falls in |
| part | 1 | which of the two parts of the stored half is used |
| exponent part | M − MANT_BW − 2 (10) | its leading zeros form the exponent |
| mantissa part | MANT_BW (20) | mantissa with a hidden leading one: 1 + mant/2^MANT_BW |

The exponent is the number of leading zeros of the exponent part, counted
from its MSB. A vector whose exponent part is nonzero yields a complete number.
For an all-zero exponent part, the count so far (10) stays in the exponent
register, and the next vector's exponent part is counted and added. The
symmetry bit, part bit and mantissa always come from the first vector; later
vectors contribute only leading zeros. Counting stops at the first one bit, or
when the count reaches `MAX_EXP` (54). The exponent is then `min(count, MAX_EXP)`.

In hardware this is a 2:1 mux that chooses 0 for a new number or the stored
exponent for a continued one, an adder with the LZ count, and one control flag
(`stall_o`). A second vector is needed with probability 2^-10 for the
default widths, so on average about one extra vector is consumed per
thousand outputs. While a number waits for another vector, `data_valid_o`
stays low, and the downstream pipeline carries that cycle as a bubble.

Read this way, exponent e and mantissa fraction f stand for a point in an
octave whose width halves with each extra leading zero. P(exp = e) = 2^-(e+1),
which matches the width of the octave. The converter therefore preserves
uniformity exactly, with a resolution that grows as x approaches the border.

## Octaves, parts and the ROM address

Only the lower half (0, 0.5) of a symmetric ICDF is stored. The symmetry bit
mirrors it: the unit outputs −y when `symm` = 1. The half is split into two
*parts*:

* **part 0**, (0, 0.25): N_OCT0 = 54 octaves that grow towards 0.25. With the
  shipped table, octave e is [2^-(e+3), 2^-(e+2)), so the deepest reaches 2^-56.
* **part 1**, [0.25, 0.5): N_OCT1 = 4 octaves that shrink towards 0.5.
  Octave e < 3 is [0.5 − 2^-(e+2), 0.5 − 2^-(e+3)). The last octave, [0.5 − 2^-5, 0.5),
  is as wide as the one before it.

Each octave has 2^K = 8 equal subsections. The ROM address is

```
section = exp_sat + (part ? N_OCT0 : 0)          // mux + adder
address = {section, mant[MANT_BW-1 -: K]}        // 6 + 3 = 9 bits, 464 words
t       = mant[MANT_BW-K-1:0]                    // 17 bits, position inside the subsection
y       = c0 + c1 * t ;  output = symm ? -y : y
```

Seen as a ROM word address, the part-1 offset is 2^K · N_OCT0 = 432.
`exp_sat` is the exponent clamped to the last octave of the selected part:
53 in part 0, 3 in part 1. So the deepest octave of each part takes every
larger exponent, and no ROM word is left unused. The clamp is not part of the
published address path, which shows only the offset mux and the adder. It is
this implementation's way to reconcile exponents up to 54 with 54 and 4
octaves.

## The coefficient table

A word is `{c0[45:0], c1[22:0]}`, both two's complement, stored as 18 hex
digits per line, in address order. The output is a fixed point number with
`COEF_FRAC` = 41 fractional bits. `c0` is the line's value at the start of the
subsection. `c1` is scaled so that the integer product `c1 * t` lines up with
`c0` and needs no shift. Each line is the degree-1 Chebyshev approximation of
the ICDF over its subsection:

```
g(t)  = icdf(x(part, e, (j + t)/8)),  t in [0, 1]          // subsection j of octave e
u_n   = cos(pi (n + 1/2) / 64),  n = 0..63                 // Chebyshev nodes
a0    = (2/64) * sum g((u_n + 1)/2)
a1    = (2/64) * sum g((u_n + 1)/2) * u_n
line(t) = a0/2 + a1 (2t - 1)
c0    = round(line(0) * 2^41)
c1    = round(2 a1 * 2^(41-17))
x(0, e, f) = 2^-(e+3) * (1 + f)
x(1, e, f) = 0.5 - 2^-(e+2) + 2^-(e+3) * f     for e < 3
x(1, 3, f) = 0.5 - 2^-5 + 2^-5 * f              (icdf(0.5) = 0)
```

For the standard normal distribution, the largest absolute error of this table
is 3.76·10^-4. The published configuration reports 3.83·10^-4 for a table of
the same shape. `tb/icdf_laplace.hex` is the same construction for the Laplace
distribution (location 0, scale 1), `icdf(x) = ln(2x)` for x < 0.5. That table
uses 39 fractional bits, because its tail reaches about −38. Its largest error
is 8.8·10^-4, against 9.0·10^-4 published. To use another point-symmetric
distribution, write a table with the same layout and pass its path as
`ROM_FILE`. If its fractional bits differ, scale `y_o` to match.
Non-symmetric distributions would need a different use of the symmetry bit,
and this RTL does not provide one.

The ROM is 464 × 69 = 32,016 bits, which fits one 36 Kb FPGA block RAM. It is
initialised by `$readmemh` with a path relative to the directory the tools run
from (the repository root). Some synthesis front ends ignore `$readmemh`. With
those, the ROM has to be given its contents by the tool's own memory
initialisation.

## Interface and timing (`nurng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `rn_i` | in | M | uniform vector |
| `rn_valid_i` | in | 1 | consume `rn_i` in this cycle |
| `fp_stall_o` | out | 1 | the converter is waiting for another vector |
| `y_valid_o` | out | 1 | `y_o` holds a sample |
| `y_o` | out | OUT_W (48) | signed sample, 41 fractional bits with the shipped table |

* The converter registers its result: `data_valid` rises in the cycle after
  the last vector of a number.
* `icdf_lookup` has three register stages: ROM read, MAC, sign. A sample
  therefore appears on `y_o` in the fourth cycle after the edge that consumed
  its last vector.
* Throughput is one sample per consumed vector, less the rare extra vectors.
  There is no back-pressure. The consumer must take every `y_valid_o` pulse.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 32 | input vector width |
| `MANT_BW` | 20 | mantissa width |
| `MAX_EXP` | 54 | largest exponent |
| `K` | 3 | subsection bits |
| `N_OCT0`, `N_OCT1` | 54, 4 | octaves in part 0 and part 1 |
| `C0_W`, `C1_W` | 46, 23 | coefficient widths |
| `OUT_W` | 48 | output width |
| `ROM_FILE` | `"rtl/icdf_normal.hex"` | table |

All are taken from the published configuration except `OUT_W`, `ROM_FILE`
and the table's fixed point scaling. `OUT_W` is sized to the 48-bit DSP
accumulator. The full sum is kept, with no rounding to a shorter output
precision. The table must match `K`, `N_OCT0`, `N_OCT1` and the widths.

## Where this RTL makes its own choices

The published description gives the datapath of both units, the field layout,
the generation loop and the sizes. It does not give the following, and this RTL
chooses them:

* The input handshake (`rn_valid_i`) and the absence of output back-pressure.
  The "stall" is a bubble in a valid-qualified pipeline.
* Reset: synchronous and active low, on control and valid registers only.
* All pipeline depths and latencies (1 + 3 cycles).
* Exponent clamping per part in the lookup unit (see above).
* Which symmetry value negates: 1 negates, and the stored half is (0, 0.5).
* The shape of the comparator tree in `lzc`.
* The coefficient scaling, the word layout and the mapping of octaves to x.
  The original coefficient generator is not reproduced. The tables are
  computed by the Chebyshev construction given above.
* Mantissa remainder width: 17 bits (MANT_BW − K with MANT_BW = 20, K = 3).
  A tool configuration with 18 bits is also described for error estimation;
  the hardware values are used here.

## Verification

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb/lzc_tb.sv` | exhaustive, widths 10 and 7 |
| `tb/mac_unit_tb.sv` | random and extreme operands; latency 1; enable holds |
| `tb/fp_converter_tb.sv` | cycle-exact against a model of the generation loop; forced zero exponent parts, runs that reach `MAX_EXP`, input gaps |
| `tb/coeff_rom_tb.sv` | synchronous read and enable on a pattern table (`tb/coeff_rom_tb.hex`); every line of the normal table within 3.834e-4 of an independent ICDF approximation at five points |
| `tb/icdf_lookup_tb.sv` | all exponents, both parts, both symmetry values; bit-exact and within 3.834e-4 of the true ICDF; latency 3 |
| `tb/nurng_top_tb.sv` | full default configuration; see below |
| `tb/nurng_uniform_tb.sv` | converter alone, at the default widths and at a 31-bit mantissa (43-bit input vectors): for 2^20 uniform floating point numbers each, the leading 12 bits pass a χ² frequency test over 4096 categories and the lowest 8 mantissa bits one over 256; exponent shares 1/2, 1/4, 1/8 |
| `tb/nurng_dist_tb.sv` | normal and Laplace generators side by side, every exponent 0..54 equally often; largest error 3.69e-4 and 8.83e-4 against bounds 3.834e-4 and 9.014e-4 |

`nurng_top_tb` first runs a directed phase. It forces single and repeated
zero exponent parts (stalls, and saturation at 54 that selects the deepest
part-0 octave) and inserts input gaps, and it counts every mechanism.
It then draws 2^20 samples from random vectors. Every sample is checked for
its cycle, bit for bit, and within 3.834e-4 of the exact normal ICDF. The draw as
a whole is checked for mean, variance, the counts beyond 3σ and 4σ, a χ² test
over 100 equiprobable categories, and about one sample per vector. A typical
run gives mean −0.0006, variance 1.0014, χ² = 103.5 on 99 degrees of freedom,
and about 1,050 extra vectors for 2^20 samples. The reference ICDF is a
rational approximation, accurate to 1e-8, in `tb/nurng_ref_pkg.sv`. It is
independent of the table.

To run a testbench with Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module nurng_top_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/nurng_pkg.sv tb/nurng_ref_pkg.sv tb/nurng_top_tb.sv
./obj_dir/Vnurng_top_tb
```

Replace the top module and the last file for the other testbenches. The
full-size top test takes about a second.

## Limits

* Normal and Laplace tables are supplied. Other symmetric distributions need
  only a table. Non-symmetric ones would need an addressing use of the symmetry
  bit that is not defined here.
* Only linear segments are supported. A higher polynomial degree would need
  more coefficients per word and more multiply-adds.
* The errors reached are those of the published tables, about 3.8·10^-4 for
  the normal distribution. A tighter figure of 0.4·2^-11 (about 2·10^-4) is
  also quoted for the original design, but this segmentation with linear fits
  does not reach it here.
* Statistical quality beyond the χ² and moment checks above depends on the
  uniform source, which is outside this RTL.
* Timing closure and area were not evaluated here. The structure targets one
  block RAM and one DSP slice, and the published design reports roughly
  400 MHz on a Virtex-5 class FPGA.
