# Two FFT networks that must agree: radix-2 DIT and radix-2² DIF in SystemVerilog

A discrete Fourier transform of N complex samples,

    X(k) = Σ x(n) · W_N^(kn),   W_N = e^(−j2π/N),   k, n = 0 … N−1

can be factored in more than one way. This design builds two of these
factorings as fully parallel, purely combinational networks, and checks that
they compute the same thing:

* **radix-2 decimation in time (DIT)**. The input is put in bit-reversed
  order. Then log2(N) stages of butterflies combine pairs of small DFTs into
  larger ones.
* **radix-2² decimation in frequency (DIF)**. The natural-order input is
  split four ways per step, over log4(N) steps. The result comes out in
  bit-reversed order and is put back in order at the end.

Both networks feed a **comparison circuit**. It raises `equal` when the two
spectra agree. At N = 4 the two networks are bit-identical for every input,
and an exhaustive testbench shows this over a small input range. At N = 16,
the default, they differ only by twiddle rounding (at most 2 LSB seen in
simulation). The comparator accepts a difference of up to `TOL` LSB per part.

The design follows the paper "Describing and Verifying FFT circuits using
SharpHDL". That paper built both networks from generic connection patterns in
an HDL embedded in C#. It then proved them equal at size 4 with a model
checker. The paper also uses a half adder as its first example. That adder is
included here as a separate small block in the top level.

## The shared parts

Both networks are built from four components:

| module | does |
|---|---|
| `fft_component` | butterfly, i.e. a 2-point DFT: `a+b`, `a−b` |
| `twiddle_mult` | multiplies by the constant W_N^K |
| `mul_neg_j` | multiplies by −j (= W_4^1): `(re, im) → (im, −re)` |
| `bit_reversal` | output position `rev(i)` takes input item `i` |

### Number format (this design's choice)

The source fixes no number format. The package `fft_pkg` defines one:

* `cplx_t` is a packed struct `{re, im}` of two signed 16-bit (`DW`) parts.
* Words do not grow from stage to stage, and nothing is scaled. The output
  is the unscaled DFT. Arithmetic wraps on overflow.
* To stay clear of overflow, keep every input part below about
  2^15 / (2N) in magnitude. That is 1023 at N = 16. The testbenches use this
  bound.

To change the widths, edit `DW` and `TW` in `fft_pkg`. They are package
constants, so every instance shares them.

### Twiddle multiplication

`twiddle_mult #(N, K)` builds one constant multiplier.

* **Trivial factors.** If K is a multiple of N/4, the factor is 1, −j, −1 or
  +j. It is then done exactly by swapping and negating the parts, with no
  multiplier. The −j case reuses `mul_neg_j`.
* **Other factors.** The module computes

      re = x.re·c + x.im·s
      im = x.im·c − x.re·s

  with c = cos(2πK/N) and s = sin(2πK/N). The coefficients are rounded to
  16-bit Q1.15 (`TW`). Each result is rounded to nearest, halves rounding
  up, and kept to 16 bits. The coefficients are worked out at elaboration
  with `$cos` and `$sin`, so no table is stored. The error is below 1 LSB.

The exact trivial case is what makes the N = 4 networks bit-exact. It also
keeps the W^0 twiddles in the networks free.

Non-trivial multipliers per network:

| N | radix-2 DIT | radix-2² DIF |
|---|---|---|
| 4 | 0 | 0 |
| 8 | 2 | – |
| 16 | 10 | 8 |
| 64 | 98 | 76 |

### Bit reversal

`bit_reversal` is built the recursive way. There are log2(N) levels. Each
level splits every block into its even-indexed items, followed by its
odd-indexed items. The first level works on the whole list, the next on
each half, and so on. Together the levels reverse the bits of every index.
For N = 8 the order is x0, x4, x2, x6, x1, x5, x3, x7. The block is pure
wiring, with no logic.

## Radix-2 DIT network (`radix2_fft`, `radix2_stage`)

The DIT split writes an M-point DFT as two M/2-point DFTs. F1 is the DFT of
the even samples, and F2 is the DFT of the odd samples:

    X(k)       = F1(k) + W_M^k · F2(k)
    X(k + M/2) = F1(k) − W_M^k · F2(k),     k < M/2

`radix2_stage #(N, M)` applies this to every block of M items. It has two
steps:

1. It multiplies the lower half of each block by W_M^k.
2. It runs each pair (k, k+M/2) through a butterfly.

`radix2_fft` puts the input through `bit_reversal`. It then chains stages
with M = 2, 4, …, N, and the output comes out in natural order. The default
N = 8 gives the classic 8-point flow graph:

* stage 1 uses W_2^0;
* stage 2 uses W_4^0 and W_4^1;
* stage 3 uses W_8^0 to W_8^3.

Only W_8^1 and W_8^3 need real multipliers.

## Radix-2² DIF network (`radix22_fft`, `radix4_stage`)

This is the least obvious part of the design.

Split the outputs of an M-point DFT by k mod 4, and group the inputs as
x0 = x(n), x1 = x(n+M/4), x2 = x(n+M/2), x3 = x(n+3M/4), for n < M/4.
Each output class is then an M/4-point DFT of a combination of the xq,
times a twiddle:

| output class | combination | then × |
|---|---|---|
| X(4k)   | x0 + x1 + x2 + x3     | W_M^(0·n) |
| X(4k+2) | x0 − x1 + x2 − x3     | W_M^(2·n) |
| X(4k+1) | x0 − j·x1 − x2 + j·x3 | W_M^(1·n) |
| X(4k+3) | x0 + j·x1 − x2 − j·x3 | W_M^(3·n) |

`radix4_stage #(N, M)` computes the four combinations with two layers of
butterflies. Only one non-trivial operation sits between the layers, a
multiplication by −j:

    a = x0 + x2     b = x0 − x2
    c = x1 + x3     d = −j · (x1 − x3)
    a + c → X(4k),  a − c → X(4k+2),  b + d → X(4k+1),  b − d → X(4k+3)

The four results, after their twiddles, are written to quarters 0, 1, 2 and
3 of the block. These hold the classes 4k, 4k+2, 4k+1 and 4k+3, in that
order. Each quarter is then a smaller DFT problem for the next step, with
block size M/4.

`radix22_fft` applies the steps with M = N, N/4, …, 4. The 0, 2, 1, 3 order
of the quarters, repeated at every level, is a bit reversal of the output
index. A final `bit_reversal` therefore puts the spectrum back into natural
order. At N = 16 the first step carries the twiddles W_16^(q·n) for
q ∈ {0, 2, 1, 3} and n = 0…3. In the second step all twiddles are W_4^0 = 1.

N must be a power of 4. Any other N stops elaboration with an error.

## Comparing the two (`fft_compare`, `fft_equiv_top`)

`fft_compare #(N, TOL)` compares each real and imaginary part. It raises
`equal` when every difference is at most `TOL` LSB. `TOL = 0`, its default,
is plain bit equality, which is what the original comparison circuit does.

`fft_equiv_top #(N = 16, TOL = 4)` drives one input list `x` into both
networks. Its outputs are:

* `X_r2` and `X_r22`, the two spectra in natural order;
* `equal`, the comparator's verdict;
* `ha_*`, the half-adder pins, which are independent of the FFTs.

How far the two agree depends on N:

* **N = 4.** All twiddles are trivial, so both networks are exact integer
  DFTs. They are equal for all inputs, and `TOL = 0` is right.
* **N = 16.** The two networks round different twiddle products. In
  simulation each stays within 1.6 LSB of the exact DFT, and they differ by
  at most 2 LSB from each other. That is why the default `TOL` is 4.
* **N = 16, outside the safe input range.** Wrap-around makes the networks
  disagree by large amounts. The comparator then reports `equal = 0`.

Everything is combinational. There are no clocks, registers or resets, and
no latency beyond the logic delay. The longest path at N = 16 runs through
four butterfly levels and up to two multipliers in each network. To run this
at speed, add pipeline registers between stages. That is outside what the
source describes.

## Half adder (`half_adder`)

`sum = x XOR y`, `carry = x AND y`. The source's prose calls the carry
"x OR y", but its structure uses an AND gate. The AND is used here, since a
half adder's carry is the AND of its inputs.

## Hierarchy and parameters

    fft_equiv_top (N=16, TOL=4)
    ├── radix2_fft (N)
    │   ├── bit_reversal
    │   └── radix2_stage (M = 2, 4, …, N)
    │       ├── twiddle_mult (W_M^k) ── mul_neg_j (when the factor is −j)
    │       └── fft_component
    ├── radix22_fft (N, a power of 4)
    │   ├── radix4_stage (M = N, N/4, …, 4)
    │   │   ├── fft_component ×4, mul_neg_j
    │   │   └── twiddle_mult ×4
    │   └── bit_reversal
    ├── fft_compare (N, TOL)
    └── half_adder

Default N per module, taken from the source's figures and its size-4 proof:

| module | default N |
|---|---|
| `radix2_fft` | 8 |
| `radix22_fft` | 16 |
| `fft_equiv_top` | 16 |
| `fft_compare` | 4 |

All ports are unpacked arrays of `fft_pkg::cplx_t`.

## Where this departs from the source, and what is assumed

* **Number format and rounding.** Both are this design's own choice, since
  the source gives none: 16-bit parts, Q1.15 twiddles, round-half-up, no
  growth, wrap-around.
* **Comparator tolerance.** The source's comparator tests exact equality.
  `TOL` is added so the comparison stays meaningful at N = 16 in fixed point.
* **How equality is shown.** The source proved size-4 equality with a model
  checker. Here it is shown by exhaustive simulation over a small input
  range (each part in −2…1, i.e. 65,536 lists), plus 20,000 random
  full-range lists. It is not a proof for all 16-bit inputs. At N = 4 both
  networks only add, subtract, swap and negate modulo 2^16, so both equal
  the DFT modulo 2^16 for every input. The random phase checks exactly that.
* **Radix-2² structure.** The source gives no code for the radix-2² circuit.
  The structure follows its equations and its 16-point flow graph, including
  the 0, 2, 1, 3 quarter order and the place of −j.
* **Even/odd order.** The source words the even/odd split ("riffling")
  ambiguously. The order used here puts the evens first, which is what its
  8-point flow graph shows (x0, x4, x2, x6, …).
* **Generic connection patterns.** The source builds its networks with
  higher-order patterns ("apply to each half", "apply to the bottom half
  only", "butterfly with riffle and unriffle"). They are written here as
  plain `generate` loops. They have no hardware of their own.

## Simulating

Each testbench checks its module against values the testbench works out
itself:

* a direct double-precision DFT, in `tb/fft_ref_pkg.sv`;
* integer arithmetic;
* explicit index formulas.

Each testbench prints one line, `TB_RESULT checks=<n> failures=<n>`.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_equiv_top.sv \
        --top-module tb_fft_equiv_top
    ./obj_dir/Vtb_fft_equiv_top

Replace `tb_fft_equiv_top` with any other testbench:

| testbench | covers |
|---|---|
| `tb_fft_equiv_top` | full top at its defaults; the main end-to-end run (below) |
| `tb_equiv_n4` | exhaustive N = 4 equivalence with `TOL = 0` |
| `tb_radix2_fft` | N = 4, 8, 16, against the DFT |
| `tb_radix22_fft` | N = 4, 16, 64, against the DFT |
| `tb_radix2_stage`, `tb_radix4_stage` | single stages against their equations |
| `tb_twiddle_mult` | all W_16^K and W_8^1 |
| `tb_bit_reversal`, `tb_fft_component`, `tb_mul_neg_j`, `tb_fft_compare`, `tb_half_adder` | one block each |

`tb_fft_equiv_top` runs the full 16-point top with its default parameters.
It uses three kinds of input:

1. an impulse, a constant, every single tone, and random lists, all in the
   safe range;
2. full-scale random lists, where the networks wrap around and the
   comparator must say they differ;
3. the four half-adder inputs.

It counts these cases:

* spectra that are bit-identical;
* spectra that differ only by rounding;
* the comparator reporting a difference;
* a half-adder carry.

It fails if any of these never happens.

Measured errors against the exact DFT, in LSB:

| size | radix-2 | radix-2² |
|---|---|---|
| N = 4 | exact | exact |
| N = 8 | 0.6 | – |
| N = 16 | 1.6 | 1.5 |
| N = 64 | – | 6.3 |
