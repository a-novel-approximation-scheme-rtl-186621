# Shared floating-point square root and inverse square root without iteration

This core computes either `sqrt(x)` or `1/sqrt(x)` of an IEEE 754 number, picked per operand, on one
datapath. Most hardware for these functions starts from a rough estimate and refines it with
Newton–Raphson steps. Here no step is iterative. The exponent is handled with a few additions. The
mantissa comes from one quadratic polynomial, chosen by the top three mantissa bits. Each polynomial is
the Chebyshev min-max fit of its function on a sub-interval, so its worst-case error is known before any
hardware is built. Square root and inverse square root differ only in which coefficients are read, so
both share one multiplier, one adder and a small ROM.

The default build is binary16 (half precision) with quadratics (`DEGREE = 2`) on 8 sub-intervals of
the mantissa range (`NSUB = 8`). A result appears 7 cycles after its operand.

## From x to a mantissa in [1,2]

Write a positive normal operand as `x = 2^eu * m`, with `m` in [1,2). Splitting off the parity of `eu`
leaves a mantissa function whose value again lies in [1,2]:

| operation | exponent of result  | mantissa factor `g`, eu even | `g`, eu odd        |
|-----------|---------------------|------------------------------|--------------------|
| SQRT      | `floor(eu/2)`       | `sqrt(m)`                    | `sqrt(2m)`         |
| ISQRT     | `-floor(eu/2) - 1`  | `2/sqrt(m)`                  | `sqrt(2)/sqrt(m)`  |

For ISQRT, `1/sqrt(m)` lies in (0.5, 1]. It is scaled by 2 here, and the exponent lowered by one,
so that all four functions share one fixed-point format and one rounding path. The odd-exponent
`sqrt(2)` factor is not a multiplication: each of the four functions has its own coefficient table.

With an odd exponent bias (true of every IEEE format), both exponents have a closed form.
`(e + bias) >> 1` for SQRT and `2*bias - 1 - ((e + bias) >> 1)` for ISQRT, where `e` is the biased
input exponent (`fp_exponent`). A normal input always gives a normal result, so there is no overflow
or underflow to handle.

## The mantissa polynomials

The mantissa range [1,2) is cut into `NSUB` equal sub-intervals. The top `log2(NSUB)` fraction bits
select one; the remaining bits, read as `u` in [0,1), give the position inside it. On each
sub-interval, `g` is approximated by

    p(u) = c0 + c1*u + ... + cn*u^n

Its coefficients minimise the largest absolute error `max |p(u) - g(u)|`. By Chebyshev's
equioscillation theorem, this optimum is the polynomial whose error reaches its maximum `E` at
`n + 2` points, with alternating sign. `coef_rom` finds it with the Remez exchange. It starts from
the Chebyshev extrema as reference points and solves the linear system `p(u_j) + (-1)^j E = g(u_j)`
by Gaussian elimination. It then moves the reference points to the error extrema found on a grid,
and solves again. For these smooth functions, one exchange is already converged.

This all runs during elaboration, in a SystemVerilog constant function. No data file is involved,
and `DEGREE` and `NSUB` can be changed freely (`NSUB` a power of two). Each coefficient is rounded to
a two's-complement number with `COEF_FRAC = 18` fraction bits in a `COEF_W = 21`-bit field. The ROM
has `4 * NSUB` words (32 by default) of `(DEGREE+1) * COEF_W` bits (63 by default), addressed by
`{op, exponent odd, sub-interval index}`.

Largest relative errors of the exact (unrounded) min-max fits, as measured by `tb/tb_table1.sv`:

| n | N  | 1/sqrt(m) | sqrt(m)  |     | n | N  | 1/sqrt(m) | sqrt(m)  |
|---|----|-----------|----------|-----|---|----|-----------|----------|
| 2 | 1  | 3.83e-3   | 7.64e-4  |     | 3 | 4  | 5.50e-6   | 7.98e-7  |
| 2 | 2  | 7.10e-4   | 1.43e-4  |     | 3 | 8  | 4.20e-7   | 6.05e-8  |
| 2 | 4  | 1.12e-4   | 2.29e-5  |     | 3 | 16 | 2.92e-8   | 4.18e-9  |
| 2 | 8  | 1.62e-5   | 3.29e-6  |     | 3 | 32 | 1.92e-9   | 2.76e-10 |
| 2 | 16 | 2.19e-6   | 4.42e-7  |     | 4 | 1  | 8.91e-5   | 9.87e-6  |
| 2 | 32 | 2.86e-7   | 5.73e-8  |     | 4 | 2  | 5.68e-6   | 6.41e-7  |
| 2 | 64 | 3.65e-8   | 7.31e-9  |     | 4 | 4  | 2.78e-7   | 3.11e-8  |
| 3 | 1  | 5.76e-4   | 8.21e-5  |     | 4 | 8  | 1.12e-8   | 1.25e-9  |
| 3 | 2  | 6.21e-5   | 9.06e-6  |     |   |    |           |          |

Use this table to pick `DEGREE` and `NSUB` for a target precision. The default n = 2, N = 8 gives
about 2^-16, well under half an ulp of binary16 (2^-11).

## Datapath and timing

`polyroot` evaluates the polynomial with Horner's scheme, `acc = cn; acc = acc*u + cj` for
`j = n-1 … 0`. It has one multiplier (coefficient width × `u` width, a single DSP block on an
FPGA) and one adder, both reused for every step. Each product is truncated back to `COEF_FRAC`
fraction bits before the addition. One operand moves through the core like this:

| cycle after acceptance | what happens                                                      |
|------------------------|-------------------------------------------------------------------|
| 1                      | operand registered; class and exponent decoded; ROM read          |
| 2                      | `prod = c2 * u`                                                   |
| 3                      | `acc = prod + c1`                                                 |
| 4                      | `prod = acc * u`                                                  |
| 5                      | `acc = prod + c0` (done)                                          |
| 6                      | round, renormalise, select special result, register output        |
| 7                      | `out_valid` high, `result` valid                                  |

In general the latency is `2*DEGREE + 3` cycles. The multiplier and adder are reused, so the core
takes one operand at a time. `in_ready` is low from the accepting edge until `out_valid` rises. A new
operand can be accepted in the cycle where `out_valid` is high, which gives one result every 7
cycles. The exponent path (`fp_exponent`) is combinational and works from the registered operand
while the Horner steps run.

After the last step, `g` has 18 fraction bits. It is rounded to nearest, with ties rounding up, to
the 10 fraction bits of the format. If rounding reaches 2.0, the fraction becomes 0 and the exponent
goes up by one. This happens for ISQRT of exact even powers of two, where `g = 2/sqrt(1) = 2`. A
value below 1.0 cannot arise from the fits, but would be clamped to 1.0.

## Special operands

Special operands follow IEEE 754. They take the same 7 cycles as any other operand.

| operand           | SQRT   | ISQRT  |
|-------------------|--------|--------|
| +0 / −0           | +0 / −0 | +inf / −inf |
| +inf              | +inf   | +0     |
| negative, −inf    | NaN    | NaN    |
| NaN               | NaN    | NaN    |
| subnormal         | treated as a zero of the same sign | same |

NaN results are the quiet NaN `0x7E00` in binary16: sign 0, top fraction bit set, rest zero.
Subnormal inputs are flushed to zero. Results are never subnormal.

## Accuracy

`tb_fp_sqrt_isqrt` runs all 65 536 binary16 operands through both operations and compares each
result with `$sqrt` in double precision:

- 61 185 of the 61 440 results for positive normal operands (both operations together) are
  correctly rounded;
- the worst error is 0.529 ulp;
- the worst relative error is 4.91e-4, just above 2^-11 = 4.88e-4. It occurs where the result
  mantissa is near 1.0, where half an ulp is largest in relative terms.

The error stays just above the half-ulp rounding error because the polynomial error (about 0.03 ulp)
adds to it. A larger `NSUB` or `DEGREE` shrinks that excess and the number of misrounded results.

## Interface

`fp_sqrt_isqrt` (top), with `W = 1 + EXP_W + FRAC_W`:

| port        | dir | width | meaning                                                    |
|-------------|-----|-------|------------------------------------------------------------|
| `clk`       | in  | 1     | clock                                                      |
| `rst_n`     | in  | 1     | asynchronous active-low reset                              |
| `in_valid`  | in  | 1     | operand valid                                              |
| `in_ready`  | out | 1     | core free; the operand is taken when both are high         |
| `op`        | in  | 1     | `sqrt_pkg::sqrt_op_e`: `OP_SQRT` (0) or `OP_ISQRT` (1)     |
| `x`         | in  | W     | IEEE 754 operand                                           |
| `out_valid` | out | 1     | one-cycle pulse, 7 cycles after acceptance                 |
| `result`    | out | W     | IEEE 754 result, held until the next one                   |

There is no output back-pressure; a consumer must take `result` when `out_valid` pulses, or read it
any time before the next result.

Parameters: `EXP_W = 5`, `FRAC_W = 10` (binary16), `DEGREE = 2`, `NSUB = 8`, `COEF_W = 21`,
`COEF_FRAC = 18`. The exponent path and the datapath widths follow `EXP_W` and `FRAC_W`. `COEF_FRAC`
must exceed `FRAC_W`, and `COEF_W` should be `COEF_FRAC + 3` (sign and two integer bits). The accuracy is set by the polynomial
table. Binary32 (`EXP_W = 8, FRAC_W = 23`) needs an error near 2^-25, so it needs a larger
`DEGREE`/`NSUB` and more coefficient bits. With n = 3, N = 32 (error 1.9e-9), `COEF_W = 33` and
`COEF_FRAC = 30`, `tb_fp_sqrt_isqrt_single` measures a worst error of 0.527 ulp over 100 000 random
operands, with a latency of 9 cycles.

## Design choices beyond the method

The method fixes the following:

- the split by operation and exponent parity;
- polynomial approximation of the mantissa function on equal sub-intervals;
- coefficients chosen by the absolute min-max criterion;
- Horner evaluation on one multiplier, one adder and a coefficient ROM;
- n = 2, N = 8 for half precision;
- a latency of 7 cycles.

The following are choices made in this RTL and can be changed without touching the method:

- **Separate tables per exponent parity** (32 words instead of 16), so that the odd-exponent
  `sqrt(2)` needs no multiplier. All three coefficients share one 21-bit format, so a word is
  63 bits. The higher coefficients are small, so per-coefficient field widths would shrink the ROM.
- **ISQRT scaled by 2**, so that every mantissa function lies in [1,2].
- **Polynomials in the local offset `u`** within each sub-interval, rather than in `m` itself. This
  keeps the coefficients small and makes `u` simply the low mantissa bits.
- **Two cycles per Horner step** (product register, then accumulator), chosen so that n = 2 gives
  7 cycles in total.
- **Fixed-point widths**: 18 coefficient fraction bits and a truncated product.
- **Rounding**: round to nearest, ties up, plus renormalisation.
- **Special operands and subnormals** as in the table above.
- **Handshake**: valid/ready on the input and a pulse on the output.
- **Reset**: every control and data register is cleared asynchronously, except the ROM output.

Synthesised with a generic flow, the core has about 160 flip-flop bits. Of these, 63 are the ROM
output register, which an FPGA block RAM provides internally. The ROM itself is 32 × 63 = 2 016 bits.

## Files

| file                   | contents                                                          |
|------------------------|-------------------------------------------------------------------|
| `rtl/sqrt_pkg.sv`      | operation and operand-class enums, default parameters            |
| `rtl/coef_rom.sv`      | elaboration-time Remez fit and the synchronous coefficient ROM    |
| `rtl/polyroot.sv`      | Horner engine: one multiplier, one adder, control                 |
| `rtl/fp_exponent.sv`   | result exponent and exponent parity                               |
| `rtl/fp_sqrt_isqrt.sv` | top: operand register, classification, rounding, packing, handshake |
| `tb/tb_fp_sqrt_isqrt.sv` | every binary16 operand through both operations, latency, throughput, mechanism counts |
| `tb/tb_polyroot.sv`    | Horner engine against `$sqrt` for all fractions and all four tables, latency 5 |
| `tb/tb_coef_rom.sv`    | each ROM word evaluated in real arithmetic against its function, read timing |
| `tb/tb_fp_exponent.sv` | exhaustive exponent check for 5- and 8-bit exponents              |
| `tb/tb_table1.sv`, `tb/table1_probe.sv` | accuracy of all 17 (n, N) configurations above |
| `tb/tb_fp_sqrt_isqrt_single.sv` | the core configured for binary32 (n = 3, N = 32), random operands and special values |

## Simulating

Every testbench checks its own results, and ends by printing `TB_RESULT checks=N failures=M`. For
example, from the project root:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/sqrt_pkg.sv \
        tb/tb_fp_sqrt_isqrt.sv --top-module tb_fp_sqrt_isqrt
    ./obj_dir/Vtb_fp_sqrt_isqrt

The same command works for the other testbenches: swap the file and the top module name. The full
binary16 sweep takes about a second. Elaborating `tb_table1` computes 17 coefficient tables and takes
about ten seconds.
