# RoBA approximate multiplier with a Kogge-Stone adder, and a four-tap FIR filter built from it

A rounding-based approximate (RoBA) multiplier does not form partial products.
It rounds each operand to its nearest power of two, Ar and Br, and uses

    A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br

The first term is usually small, so it is dropped:

    A*B ~= Ar*B + Br*A - Ar*Br

Ar and Br are powers of two, so the three remaining products are just shifts.
That leaves a leading-one detector per operand, three barrel shifters, one
adder and one subtractor in place of a partial-product array. In this version
the adder is a Kogge-Stone parallel-prefix adder. Around the multiplier sits a
four-tap direct-form FIR filter that uses one RoBA multiplier per tap.

All RTL is synthesizable SystemVerilog-2017. The default sizes are 8-bit
operands, 16-bit products and an 18-bit filter output.

## How the approximation behaves

- **Rounding rule.** Take an input whose leading one is bit k. It lies between
  2^k and 2^(k+1). It rounds up when bit k-1 is also set, which means it is at
  or above the midpoint 3*2^(k-1). Otherwise it rounds down.
  - So a value exactly midway (3, 6, 24, 48, 96, ...) goes to the larger power.
  - The one exception is 12, which goes to 8 rather than 16.
  - Zero stays zero, which makes every product with a zero operand exactly 0.
- **Error sign.** The dropped term is (Ar-A)*(Br-B).
  - If one operand was rounded up and the other down, that term is negative and
    the approximation comes out high.
  - If both were rounded the same way, the approximation comes out low.
  - If either operand is a power of two, the result is exact.
- **Example.** 10 x 5: 10 rounds to 8 and 5 rounds to 4, giving
  8*5 + 4*10 - 8*4 = 48 instead of 50.
- **Measured error.** Over all non-zero pairs of signed 8-bit operands, the
  mean relative error of the signed variant is 2.8 %. `tb_roba_multiplier`
  prints this figure.
- **No negative magnitude.** For non-zero operands, A/Ar and B/Br are both at
  least 3/4. So Ar*B + Br*A - Ar*Br is at least half of Ar*Br, and the
  subtraction never goes below zero.

## Multiplier datapath (`roba_multiplier`)

```
 a,b --> sign detector --|A|,|B|--> rounding (x2) --Ar,Br-->  shifter  Ar*B  --+
            |                                                 shifter  Br*A  --+--> Kogge-Stone adder --+
            |                                                 shifter  Ar*Br ---------------------------+--> subtractor --> sign set --> p
            +------------------------------ product sign ------------------------------------------------------------------^
```

1. **Sign detector** (`roba_sign_detector`).
   - Produces |A| and |B| with exact negation (~X + 1).
   - The product sign is the XOR of the two sign bits.
   - The magnitudes are N bits wide, so that -2^(N-1) is represented.
2. **Rounding** (`roba_rounding`).
   - A leading-one detector, followed by a test of the bit below the leading one.
   - The result is a one-hot word N+1 bits wide. The extra bit lets an unsigned
     operand round up to 2^N. For signed operands it is always 0.
3. **Shifters** (`roba_shifter`, three instances).
   - Each one encodes its one-hot power into a binary shift amount.
   - A logarithmic barrel shifter then shifts in ceil(log2(N+1)) stages.
   - The three instances form Ar*B, Br*A and Ar*Br as 2N-bit words.
4. **Adder** (`roba_ksa`). A 2N-bit Kogge-Stone adder forms Ar*B + Br*A.
5. **Subtractor** (`roba_subtractor`).
   - Computes the sum minus Ar*Br as x + ~y + 1.
   - It uses a second Kogge-Stone adder with its carry-in set.
6. **Sign set** (`roba_sign_set`). Negates the magnitude when the product is
   negative.

All internal words are 2N bits wide, and all arithmetic is modulo 2^(2N).
- For unsigned operands, Ar*B + Br*A can need 2N+1 bits, and Ar*Br can equal
  2^(2N).
- The final magnitude still always fits in 2N bits, so the wrap-around in the
  adder cancels in the subtractor.
- For signed operands the magnitude is at most 2^(2N-2), so p is a correct
  2N-bit two's complement number.

The multiplier is purely combinational.

### Variants

Select the variant with the `VARIANT` parameter, of type
`roba_pkg::roba_variant_e`:

| `VARIANT`            | operands         | sign set                                  |
|----------------------|------------------|-------------------------------------------|
| `ROBA_SIGNED` (default) | two's complement | exact, ~X + 1                          |
| `ROBA_APPROX_SIGNED` | two's complement | ~X only: negative results are 1 too small, and a zero product with operands of opposite signs reads -1 |
| `ROBA_UNSIGNED`      | unsigned         | sign detector and sign set left out       |

## Kogge-Stone adder (`roba_ksa`)

- Each bit makes a generate g = a&b and a propagate p = a^b.
- The prefix operator (g,p) o (g',p') = (g | p&g', p&p') combines them over
  ceil(log2(W+1)) levels.
  - Level l joins each position with the one 2^l below it.
  - The carry-in is an extra position below bit 0, which is why there are W+1
    positions.
- Sum bit i is p[i] XOR the group generate of everything below bit i.
- This gives logarithmic depth and about W*log2(W) operators.
- W is a parameter (default 16). The adder is tested at 16, 32 and 64 bits.

## FIR filter (`roba_fir`, the top)

    y(n) = b0*x(n) + b1*x(n-1) + b2*x(n-2) + b3*x(n-3)

- **Delay line.** Three `roba_unit_delay` registers hold x(n-1), x(n-2) and
  x(n-3).
- **Taps.** Each tap has a RoBA multiplier.
- **Adder chain.** Three Kogge-Stone adders are chained:
  - the first adds tap 0 and tap 1;
  - each of the others adds one more product;
  - the last one gives y.
- **Output width.** Products are sign-extended to 2N + clog2(TAPS) = 18 bits,
  so the sum cannot overflow.

Timing:
- One sample per clock, with no enable.
- y is combinational from x and the delay line. It gives y(n) for the sample
  currently on x, in the same cycle.
- The sample moves into the delay line on the rising edge.
- `rst_n` is active low and asynchronous. It clears the delay line.
- The coefficients `b[k]` (weighting x(n-k)) are ports, so they can change at
  any time.

Ports: `clk`, `rst_n`, `x[N-1:0]`, `b[TAPS-1:0][N-1:0]`, `y[2N+clog2(TAPS)-1:0]`.
Parameters: `N` (8), `TAPS` (4), `VARIANT` (`ROBA_SIGNED`).

The impulse response is exact. Rounding 1 gives 1, so 1*b = b, and an impulse
on x reads back b0..b3 on y.

## What follows the source description, and what is filled in here

Taken from the published design:
- the approximation formula;
- the block order: sign detector, rounding, three shifters, Kogge-Stone adder,
  subtractor, sign set;
- the 2n-bit adder;
- exact and approximate negation, and the three variants;
- the 8-bit operand and 16-bit product sizes;
- the four-tap filter structure: a unit-delay chain, a RoBA multiplier per tap,
  and an adder chain.

Choices made here:
- **Rounding rule.**
  - The source gives the rule only in words: midpoints go to the larger power,
    with one exception.
  - That exception is read as the value 12. Change the last assignment in
    `roba_rounding` if another reading is wanted.
  - The gate-level rounding logic is this design's own.
- **10 x 5 result.** The source's simulation of the 8-bit multiplier shows
  10 x 5 = 50, the exact product. The formula above gives 48. The RTL follows
  the formula.
- **Internal formats.**
  - Rounded values are one-hot words, N+1 bits wide.
  - The shifter encodes them into a shift amount.
  - The datapath works modulo 2^(2N).
- **Subtractor.** It is built from a Kogge-Stone adder. The source does not say
  how the subtractor is built.
- **Filter details.** All of these are this design's own:
  - the filter's sample and coefficient width;
  - the coefficients as ports;
  - the 18-bit output;
  - a combinational output;
  - one sample per clock;
  - the asynchronous reset;
  - Kogge-Stone adders in the filter's adder chain.
- **Not built.** The source mentions an IIR notch filter with floating-point
  units, but does not describe it. No RTL is given for it.

## Files

- `rtl/roba_pkg.sv`: the variant enum
- `rtl/roba_fir.sv`: the filter (the top)
- `rtl/roba_multiplier.sv`: the multiplier
- `rtl/roba_sign_detector.sv`, `rtl/roba_rounding.sv`, `rtl/roba_shifter.sv`,
  `rtl/roba_ksa.sv`, `rtl/roba_subtractor.sv`, `rtl/roba_sign_set.sv`,
  `rtl/roba_unit_delay.sv`: the datapath blocks
- `tb/roba_ref_pkg.sv`: integer reference model for the testbenches
- `tb/tb_<module>.sv`: one self-checking testbench per module

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends the run with a failure if it hangs. For example:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_roba_fir \
        rtl/roba_pkg.sv tb/roba_ref_pkg.sv tb/tb_roba_fir.sv
    ./obj_dir/Vtb_roba_fir

Replace `tb_roba_fir` with any other testbench name. Each runs in well under a
second.

- `tb_roba_multiplier` checks every pair of 8-bit operands for all three
  variants, plus random 12-bit pairs, against `roba_ref_pkg`.
  - The reference rounds by comparing distances to the neighbouring powers,
    not bit by bit as the RTL does.
- `tb_roba_fir` runs the filter at its default sizes:
  - a reset, an impulse, and directed samples that hit every rounding case;
  - 10,000 random samples with changing coefficients, and a reset in the
    middle of a stream;
  - it counts negative products, operands rounded up and down, midpoints, the
    12 -> 8 case, zero operands, resets and mixed-sign sums, and fails if any
    of them never happens.
- The block testbenches check each module on its own. The rounding and sign
  detector checks are exhaustive at 8 bits. The adder is checked at 16, 32 and
  64 bits.

## Changing it

- `N` scales the multiplier and the filter. Every internal width follows from
  it.
- `TAPS` changes the filter length. The delay line, taps and adder chain are
  generated from it.
- The reference model in `tb/roba_ref_pkg.sv` takes the width and variant as
  arguments, so the testbenches adapt easily.
