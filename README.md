# Multiplierless 6-tap FIR filter with shared common subexpressions

A finite impulse response filter multiplies every input sample by a set of
constant coefficients and adds the delayed products:

    y(n) = h(0)x(n) + h(1)x(n-1) + ... + h(5)x(n-5)

When the coefficients are fixed, no multiplier is needed. Each coefficient is
written in canonical signed-digit (CSD) form, with digits in {-1, 0, +1} and
never two nonzero digits side by side. The product is then a sum of shifted
copies of the input, one adder or subtractor per nonzero digit beyond the
first. The cost can be cut further by finding digit patterns that repeat, the
*common subexpressions*. Such a pattern is computed once, and its result is
shifted and reused wherever the pattern occurs.

This RTL implements a 6-tap symmetric low-pass filter this way, with a 16-bit
input. The filter splits into two parts:

* a **multiplier block** that forms the three distinct products h(0)x, h(1)x
  and h(2)x from shared subexpressions; and
* a **delay block**, a transposed delay line with five registers and five
  *structural adders*, which adds the products with the right delays.

## The coefficients

The filter is a 6-tap low-pass design with a pass-band edge of 0.2π and a
stop-band edge of 0.25π. Its coefficients are symmetric: h(5)=h(0), h(4)=h(1)
and h(3)=h(2). Digit j has weight 2^-j:

| coefficient | nonzero CSD digits (sign at shift j)          | value x 2^16 |
|-------------|-----------------------------------------------|-------------:|
| h(0), h(5)  | +2 +6 -8 +10 +12 +14 -16                      | 17235        |
| h(1), h(4)  | +2 -4 +8 +10 +12 -14 -16                      | 12619        |
| h(2), h(3)  | +2 -5 +9 -15                                  | 14462        |

The symmetric half holds 18 nonzero digits. Forming each product digit by digit
would take 18 - 3 = 15 adders in the multiplier block.

Computed from these coefficients, the gain is 1.35 (+2.6 dB) at DC, 0.65 at
0.2π, 0.35 at 0.25π and exactly zero at π. A six-tap filter cannot have a
sharp transition band, so the 0.2π/0.25π edges describe the design target
rather than a brick-wall response.

## The multiplier block (`rtl/cse_mult_block.sv`)

This is the part of the design that needs the most explanation. Write `x1`
for the input and `v@j` for "v shifted right by j", which is v·2^-j.
Subexpressions of two kinds are formed first:

* **Horizontal** subexpressions are digit patterns inside one coefficient:
  * `x2 = x1 + x1@2`, pattern `[1 0 1]`
  * `x3 = x1 - x1@2`, pattern `[1 0 -1]`
  * `x4 = x1 - x1@3`, pattern `[1 0 0 -1]`
* An **identical-shift pair** is a grouping of two horizontal subexpressions
  that appear in two coefficients with the same spacing. `x2` at shift 10 and
  `x3` at shift 14 occur in h(0). `x2` at shift 8 and `x3` at shift 12 occur in
  h(1). Both pairs are four digits apart, so `g = x2 + x3@4` is built once and
  used as `g@10` in h(0) and `g@8` in h(1).

The products are then:

    h(0)·x1 = (x1@2 + x3@6) + g@10
    h(1)·x1 = (x3@2 - x1@16) + g@8
    h(2)·x1 = x4@2 + (x1@9 - x1@15)

Each line can be checked against the table by expanding it. For example,
`x3@6 = +6 -8` and `g@10 = x2@10 + x3@14 = +10 +12 +14 -16`, which together
with `+2` gives h(0).

| adder | result          | adder-step |
|-------|-----------------|-----------:|
| A1    | x2              | 1          |
| A2    | x3              | 1          |
| A3    | x4              | 1          |
| A4    | g               | 2          |
| A5    | x1@2 + x3@6     | 2          |
| A6    | x3@2 - x1@16    | 2          |
| A7    | x1@9 - x1@15    | 1          |
| A8    | h(0)·x1         | 3          |
| A9    | h(1)·x1         | 3          |
| A10   | h(2)·x1         | 3          |

That makes 10 adders, against 15 for the digit-by-digit form. The longest
path through the block is 3 adder-steps.

### Departure from the published optimum

The published design claims a network of **8** multiplier-block adders with a
logic depth of 4. It combines the horizontal subexpressions with *vertical*
ones, which are patterns that repeat at the same digit position in adjacent
coefficients. An example is `x1 + x1(n-1)`, which needs a register inside the
multiplier block. The published drawing of that network cannot be made to
reproduce the coefficients, and the selection procedure behind it is not
published in full. This block therefore uses the 10-adder network above. It
computes exactly the same products, so the filter's input-output behaviour is
unaffected. Only the adder count and the logic depth differ. The block has no
vertical subexpression and no internal register.

### Number format

Outputs are exact: each product is the true value scaled by 2^16 and held in
`PW = W + 16 + 2 = 34` bits. Nothing is truncated, so every right shift above
is implemented as a left shift of an integer-scaled subexpression. The
comments in the code give the scaling of each signal. The shifts are written
for 16 fractional digits, so the network is tied to these coefficients.
`W` may be changed freely.

## The delay block (`rtl/fir_delay_block.sv`)

The delay block is a transposed direct form. Register `s[5]` loads
`prod[5]`. Each register `s[k]`, for k = 4 down to 1, loads `prod[k] + s[k+1]`.
The output is `y = prod[0] + s[1]`. Each product is therefore delayed by its
tap index. There are N-1 structural adders, a number fixed by the filter
length. The multiplier block's cost is what the subexpression sharing
reduces.

Because the filter is symmetric, the top level wires the three products to
six taps as `p0, p1, p2, p2, p1, p0`. The second half of the filter costs no
multiplier-block adders.

## Interface and timing (`rtl/fir_cse_top.sv`)

| port    | dir | width | meaning |
|---------|-----|------:|---------|
| `clk`   | in  | 1     | clock, rising edge |
| `rst_n` | in  | 1     | asynchronous active-low reset; clears the delay line |
| `en`    | in  | 1     | sample enable: a new sample is taken on each rising edge with `en` high; with `en` low the filter holds |
| `x_in`  | in  | 16    | input sample, two's complement |
| `y_out` | out | 34    | filter output, two's complement, scaled by 2^16 (`y_out / 65536` is y(n) in input units) |

* Latency is zero. `y_out` is combinational from `x_in` and responds in the
  same cycle. The critical path is the multiplier block (3 adder-steps) plus
  one structural adder.
* The design has 5 × 34 delay-register bits and no input or output register.
  Synthesis trims the last register to 32 bits.
* No overflow is possible. The sum of |h(k)| is 1.35, below the 2 guard bits.

Shared sizes are in `rtl/fir_cse_pkg.sv`: `NTAPS=6`, `W_DEF=16`, `FRAC=16`
and `GUARD=2`.

### Choices not fixed by the filter's description

The following are this implementation's own choices:

* the sample enable `en`;
* the asynchronous reset;
* the exact 34-bit output instead of a rounded one;
* the zero-latency output path;
* the multiplier block's adder network, described above.

If a registered output is needed, add a register after `y_out`. For a shorter
output word, round `y_out` and drop low bits.

## Verification

Each testbench checks against values computed independently of the RTL. Its
reference uses ordinary multiplications by coefficients built from the CSD
digit table. Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* `tb/tb_cse_mult_block.sv` tests the three products for zero, ±1, the
  extreme inputs, a walking one and 2000 random samples.
* `tb/tb_fir_delay_block.sv` drives random products on all taps and compares
  with a history model. It covers cycles with `en` low, a reset in mid-stream
  and the zero-latency path.
* `tb/tb_fir_cse_top.sv` runs the whole filter at its default sizes:
  * impulse responses at heights 1, +32767 and -32768, read back as h(0)..h(5)
    starting in the same cycle;
  * full-scale steps up and down, which give the largest output;
  * 4000 random samples with `en` low about a quarter of the time and one
    reset;
  * a tone at 0.0625π, which the filter passes, and one at 0.91π, which it
    attenuates.

  Each of these events is counted, and the test fails if any never happens.

The tests check behaviour, not adder count or logic depth.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl rtl/fir_cse_pkg.sv rtl/cse_mult_block.sv \
        rtl/fir_delay_block.sv rtl/fir_cse_top.sv tb/tb_fir_cse_top.sv \
        --top-module tb_fir_cse_top -o sim && ./obj_dir/sim

To test one block, swap in the matching testbench and top-module name. All
testbenches finish in well under a second.
