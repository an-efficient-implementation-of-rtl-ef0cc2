# Exponential random number generator by piecewise-polynomial inverse CDF

Simulators of queues, network traffic, radioactive decay and chemical
kinetics consume large numbers of exponentially distributed random numbers.
This design makes one such number per clock cycle. It starts from a 32-bit
uniform random word and pushes it through the inverse cumulative
distribution function (CDF) of the exponential distribution:

    x = u / 2^32            (0 <= x < 1)
    y = -ln(1 - x)          (unit-rate exponential; scale by 1/lambda for rate lambda)

A logarithm is expensive in hardware, and a table of y for every one of the
2^32 inputs is impossible. The generator therefore cuts [0, 1) into
2^INDEX_BITS equal intervals (256 by default). Inside each interval it
replaces -ln(1-x) with a short polynomial fitted by least squares. The top
INDEX_BITS bits of u select the interval. The polynomial's coefficients come
from small look-up tables. The polynomial is then evaluated in IEEE
single-precision floating point on the full 32-bit x.

The trade-off is between table size and polynomial order. More intervals
shrink the fitting error quadratically (linear fit) or faster (higher order)
but multiply the table memory. A higher order needs one more table and more
multipliers and adders. The RTL makes both knobs parameters.

## Files

| file | what it is |
|---|---|
| `rtl/exp_rng.sv` | top: the generator pipeline, `ORDER` 1/2/3, `INDEX_BITS` |
| `rtl/coef_dlut.sv` | one coefficient table (one per polynomial coefficient), computed at elaboration |
| `rtl/urn_to_fp32.sv` | uniform word to float32 fraction u/2^32 |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv` | float32 multiplier and adder, one register stage each |
| `rtl/pipe_delay.sv` | register chain that keeps operands aligned |
| `rtl/fp32_pkg.sv` | float32 struct type, the table-fitting constant functions |
| `tb/tb_*.sv` | self-checking testbenches (see below) |

## Interface and timing of `exp_rng`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (the original ran at 100 MHz) |
| `rst_n` | in | 1 | asynchronous active-low reset; clears only the valid chain |
| `urn_valid` | in | 1 | `urn` holds a new word this cycle |
| `urn` | in | 32 | uniform random word |
| `rnd_valid` | out | 1 | `rnd` holds a result this cycle |
| `rnd` | out | 32 | float32 result, `fp32_pkg::fp32_t` (sign, exp, man) |

A word is accepted on every rising edge where `urn_valid` is high. There is
no back-pressure. The result appears `2*ORDER+1` edges later: 3 for linear,
5 for quadratic and 7 for cubic. Results come out in input order, and
`rnd_valid` marks them. Back-to-back inputs give back-to-back outputs, one
number per clock, which is 10^8 numbers per second at 100 MHz. Only the valid
bits are reset. Data registers are not reset, and their contents are
meaningless while `rnd_valid` is low.

The uniform source is not part of this RTL. The original system fed the
generator from a separately designed true random number generator based on
ring oscillators and LFSRs. Any 32-bit uniform source can drive `urn`.

## The pipeline

Stage 0 registers `urn`. In stage 1, `urn_to_fp32` turns the word into the
float32 number u/2^32. At the same time, the top `INDEX_BITS` bits address
`ORDER+1` synchronous-read tables. Table k holds the coefficient of x^k for
every interval. The polynomial is evaluated in powers of x, with each
multiply and add in its own stage:

    linear     y =  A1*x + B1                            mul, add
    quadratic  y = (A2*x^2 + B2*x) + C2                  x*x and B*x | A*x^2 | add | add C
    cubic      y = ((A3*x^3 + B3*x^2) + C3*x) + D3       x*x and C*x | x*x^2 and B*x^2 | A*x^3 | add | add | add D

Each coefficient and partial product is delayed in `pipe_delay` until the
stage where it is consumed. With this layout the clock period is set by a
single float32 operator. Throughput does not depend on the order. Only the
latency and the operator count grow: linear uses 1 multiplier and 1 adder,
quadratic 3 and 2, cubic 5 and 3.

### Float32 arithmetic

`fp32_mul` and `fp32_add` are IEEE-754 single precision with round to
nearest, ties to even. A result below the smallest normal number becomes
zero, and zero-exponent inputs count as zero (no denormals). Infinities and
a quiet NaN are produced where IEEE requires them, though the generator
itself never creates them. The adder keeps guard, round and sticky bits
through alignment and handles cancellation with a leading-zero shift.

`urn_to_fp32` finds the leading one and rounds the 32-bit word to 24
significant bits. This is the correctly rounded value of u/2^32. Words from
0xFFFFFF80 up round to exactly 1.0.

## How the coefficient tables are made

The tables are computed in SystemVerilog by constant functions in
`fp32_pkg` while the design elaborates. No data file is involved, and the
tables follow `ORDER` and `INDEX_BITS` automatically. For interval j, with
a = j/2^INDEX_BITS and h = 1/2^INDEX_BITS:

1. sample t_i = (i + 0.5)/64 for i = 0..63, x_i = a + h*t_i, y_i = -ln(1 - x_i);
2. solve the least-squares normal equations for p(t) = sum_k c_k t^k (order
   `ORDER`, Gaussian elimination in double precision);
3. re-expand in powers of x: the coefficient of x^m is
   sum_{k>=m} c_k * C(k,m) * (-a)^(k-m) / h^k;
4. round to float32 (nearest, ties to even).

The original fit used every one of the 2^24 input values in an interval.
The 64-point midpoint fit stands in for it and agrees closely. For example,
interval 0 gives A1 = 1.00196 against 1.00200, and interval 255 gives
A1 = 759.7 against 767.2. The latter is sensitive to how the singular end
of the last interval is sampled.

Elaboration is not instant: Verilator needs about 5 s per 256-entry table.

## Accuracy, and where the cubic form breaks down

The mean squared error (MSE) was measured against -ln(1-x) on 16 evenly
spaced points per interval, 256 intervals. The last column is the MSE
reported for the original design at the same table size:

| order | MSE, all intervals | MSE without top 2 intervals | quoted MSE of the original |
|---|---|---|---|
| 1 linear | 5.6e-4 | 2.1e-7 | 9.73e-4 |
| 2 quadratic | 1.6e-4 | 1.7e-9 | 4.30e-4 |
| 3 cubic | 3.9 | 2.0e-5 | 2.41e-4 |

Nearly all the error sits in the last interval or two, where -ln(1-x)
becomes infinite. For the cubic form the float32 evaluation makes it much
worse. The polynomial is evaluated in powers of the absolute x, so in the
top interval the coefficients reach about 10^8 and cancel to a result of
about 5. That loses all significance at float32's 24-bit precision. The
design keeps the absolute-x form because that is how the generator is
defined. Anyone who needs the cubic form near x = 1 should evaluate it in
the local variable t = (x - a)/h instead (the low bits of u), or use
`ORDER` 1 or 2 with 256 intervals.

Sample outputs (linear, 256 intervals):

| u | y (this RTL) | exact -ln(1-x) |
|---|---|---|
| 0x80000000 | 0x3F3171C2 = 0.693142 | 0x3F317218 = 0.693147 |
| 0x00567854 | 0x3AAD1C86 = 0.0013207 | 0x3AAD0DE4 = 0.0013203 |
| 0x00000000 | 0xB5AB38ED = -1.3e-6 | 0 |

Input 0 does not give exactly 0. It gives the first interval's constant
term, which is a tiny number and may be negative. Quadratic and cubic give
0x3F317218 and 0x3F317217 for 0x80000000.

The original hardware printed 0x3F317346, 0x3AAD0FC3 and exactly 0 for
these three inputs. Its table size and order for that run are not known,
and neither are the exact table contents or the rounding of its
floating-point library. So these outputs are not expected to match bit for
bit. Both sets lie within the fit error of the exact values.

## Resources

Table memory is `(ORDER+1) * 2^INDEX_BITS * 32` bits: 16 Kbit for the
default, 128 Kbit for cubic with 1024 intervals, and 8 Mbit for cubic with
65536 intervals. The logic is essentially independent of `INDEX_BITS`. On the
original FPGA this made block RAM, not logic, the limit: 2^16-entry quadratic
and cubic tables did not fit in a 148-block device.

## Departures and choices

Choices this implementation makes where the original description is silent
or differs:

- The valid handshake and the reset of the valid chain are additions. The
  original datapath free-runs.
- The default is linear with 256 intervals. This is the configuration whose
  hardware output is shown above. Quadratic and cubic are parameter settings.
- 8 index bits, as in the description of the design. Some of the original
  listings index with 6 bits (64 intervals); set `INDEX_BITS = 6` for that.
- Exact IEEE rounding replaces the original third-party floating-point
  library. Results may differ from the original hardware in the last bits.
  In the original, integer-to-float conversion followed by a multiplication
  by a constant produced x; here a direct conversion does.
- Coefficients are stored as float32 words, so no conversion happens at run
  time. This is one of the two storage options described.
- Each operator is a single unpipelined stage. A faster clock would need
  pipelined float units.
- The cubic form is evaluated as written, A3*x^3 + B3*x^2 + C3*x + D3, with
  x^2 and x^3 formed explicitly. That takes five multipliers. The original
  description counts three multiplications for the cubic, which only a
  nested (Horner) form achieves, yet it also describes forming the square
  and the cube. The explicit-power form was kept. Horner's form would save
  two multipliers, but it does not cure the cancellation near x = 1.
- Not included: the true random number generator, and the FIFO and timer
  used to measure throughput (vendor IP driven from processor software). The
  testbenches replace them with a generated uniform sequence and a cycle
  count.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. With plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fp32_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_exp_rng.sv --top-module tb_exp_rng
    ./obj_dir/Vtb_exp_rng

| testbench | what it checks |
|---|---|
| `tb_fp32_mul`, `tb_fp32_add` | 22k / 40k operand pairs against double-precision results rounded to float32, bit-exact; specials; latency 1 |
| `tb_urn_to_fp32` | every single-bit word, rounding ties, 20k random words, bit-exact |
| `tb_coef_dlut` | all 9 tables of the linear/quadratic/cubic 256-interval fits against an independent Gram-Schmidt least-squares fit |
| `tb_exp_rng` | orders 1, 2, 3 side by side: every result against the polynomial in double precision (within float32 rounding), latency, back-to-back throughput, bubbles, reset flush, interval ends, sample values, MSE and mean |
| `tb_exp_rng_full` | default parameters, 2^16 words back to back: 2^16 + 3 cycles in total, per-result error bound, MSE <= 9.73e-4 |
| `tb_exp_rng_dlut1024` | linear fit with 1024-entry tables, the size used behind a true random source: latency, one result per clock, per-result error bound, sweep MSE 9.6e-5 against the 2.44e-4 quoted |

`tb_fp_ref_pkg` holds the testbenches' reference arithmetic. It was written
separately from the RTL: it converts values by formula and `$floor`, and
fits with Gram-Schmidt instead of normal equations.
`tb_exp_rng_chk` is the per-instance scoreboard that `tb_exp_rng` uses.

## Changing it

- **Order / table size:** set `ORDER` (1..3) and `INDEX_BITS` (1..16) on
  `exp_rng`. Tables regenerate automatically. Elaboration time and memory
  grow with the number of entries. The simulated sizes are 256 entries for
  all three orders, and 1024 entries for the linear fit. The linear build
  at 1024 entries takes about 20 s and needs about 6 GB. A Verilator build
  holding all three orders at 1024 entries (nine tables) ran out of memory
  on a 16 GB machine. Quadratic and cubic at 1024 entries are therefore
  untested. Simulate one configuration at a time.
- **Another distribution:** replace `-$ln(1.0 - x)` in
  `fp32_pkg::fit_interval` with that distribution's inverse CDF. It must be
  finite on the sampled points. The datapath does not change.
- **Rate lambda:** divide the inverse CDF in `fit_interval` by lambda, or
  multiply `rnd` by 1/lambda downstream.
