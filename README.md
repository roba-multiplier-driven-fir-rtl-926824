# A FIR filter on rounding-based approximate (RoBA) multipliers

A multiplier is usually the slowest and largest part of a FIR filter. The
rounding-based approximate multiplier (RoBA) gives up a little accuracy to
remove the partial-product array. It rounds each operand to its nearest power of two,
`Ar` and `Br`, and uses the identity

    A*B = Ar*B + Br*A - Ar*Br + (Ar - A)*(Br - B)

Every term but the last multiplies by a power of two, which is a shift. The
last term is the product of two rounding errors, so it is small next to
`A*B`. RoBA drops it:

    A*B  ~=  Ar*B + Br*A - Ar*Br

What remains is three shifters, one adder and one subtractor. This repository
holds a signed 32 x 32 -> 64-bit RoBA multiplier in SystemVerilog. It also
holds a 4-tap FIR filter built from four of these multipliers. The filter is
the top of the design.

## Accuracy you can expect

The approximation is exact when either operand is zero or a power of two.
Its sign can go either way:

- It overshoots when one operand was rounded up and the other down.
- It undershoots when both were rounded the same way.

Over random 31-bit magnitudes, the mean relative error is about 2.9%. The
worst case is about 11%, and 3 x 3 gives 8 (-11.1%). Some more examples:

| A | B | RoBA product | exact |
|---|---|---|---|
| 858993459 (0x33333333) | 1145324612 (0x44444444) | 999198636824854528 | 983826350139712908 |
| 6 | 7 | 40 | 42 |
| -6 | 7 | -40 | -42 |

In the first row both operands round to 2^30.

## Rounding to the nearest power of two (`rounding.sv`)

This is the part that needs the most care. Let `p` be the position of the
leading one of a magnitude `v`:

- If bit `p-1` is also set, `v >= 3*2^(p-1)` and it rounds **up** to
  `2^(p+1)`. The midpoint itself rounds up, because that choice gives the
  simplest logic.
- Otherwise `v` rounds **down** to `2^p`.
- The exception is `v = 3`, which rounds down to 2.
- Zero stays zero.

The result is one-hot. Each of its bits is an independent equation:

    Ar[i] = (~A[i] & A[i-1] & A[i-2]  |  A[i] & ~A[i-1]) & ~|A[N-1:i+1]   (i >= 3)
    Ar[2] =  A[2] & ~A[1] & ~|A[N-1:3]
    Ar[1] =  A[1] & ~|A[N-1:2]
    Ar[0] =  A[0] & ~|A[N-1:1]

The equations assume that bit `N-1` of the input is 0. This holds for the
magnitude of any signed number, whose largest value, `2^(N-1)`, rounds to
itself. So `Ar` never needs an extra bit. An unsigned operand with its MSB
set could need `2^N`, so the design supports signed operands only.

## The multiplier datapath (`RoBA_mul.sv`)

```
 A,B -> [in regs] -> sign_det -> |A|,|B| -> rounding -> Ar,Br
                        |              |
                        |   barrel_shifter x3: Br*|A|, Ar*|B|, Ar*Br   (2N bits)
                        |              |
                        |   kogge_stone_adder: Ar*|B| + Br*|A|
                        |   subtractor:        ... - Ar*Br
                        +-> sa,sb ---> sign_set: negate if sa^sb, register -> Final_Out
```

| module | job |
|---|---|
| `sign_det` | Splits each operand into a sign bit and an N-bit magnitude. |
| `rounding` | Computes `Ar` and `Br` as above. |
| `barrel_shifter` | Turns the one-hot value into a shift amount with an OR-encoder, then shifts the N-bit operand through `log2(2N)` stages into 2N bits. A zero `pow2` gives zero. |
| `kogge_stone_adder` | A W-bit parallel-prefix adder (see below). |
| `subtractor` | Computes `a + ~b + 1` on the same adder. The approximate magnitude is at least half of `Ar*Br`, so it never goes negative. An assertion in `RoBA_mul` checks that there is no borrow and no adder carry-out. |
| `sign_set` | Negates the magnitude when exactly one operand was negative, and holds the output register. |

**Timing.** `A` and `B` are registered on entry. The product is registered in
`sign_set`. `Final_Out` therefore shows the product of the operands applied
two rising edges earlier. A new pair can be applied every cycle.

**Reset.** `rst` is synchronous and active high. It clears both register
stages.

The ports follow the published symbol: `clk`, `rst`, `A[31:0]`, `B[31:0]`
and `Final_Out[63:0]`. The instance names `sd` and `ss` do too. The placement
of the two registers is this design's choice.

## Kogge-Stone adder (`kogge_stone_adder.sv`)

The adder works in three phases:

1. It computes `g = a & b` and `p = a ^ b` for each bit. The carry-in is
   folded into the generate of bit 0.
2. It runs `log2(W)` prefix levels. Level `l` combines each bit `i` with bit
   `i - 2^(l-1)`:
   - `G = G_i | P_i & G_(i-d)`
   - `P = P_i & P_(i-d)`
3. It computes `sum[i] = p[i] ^ G[i-1:0]`.

The default width is 64. The testbench also checks a 16-bit instance, the
size of the classic textbook illustration of this adder.

## The FIR filter (`fir.sv`, top)

The filter computes `y[n] = h0*x[n] + h1*x[n-1] + h2*x[n-2] + h3*x[n-3]` in
direct form:

- A 3-register delay line holds the past samples.
- Multiplier `k` takes `h_k` on `A` and the tap on `B`.
- Three 64-bit Kogge-Stone adders chain the four products.
- The sum is registered into `y`.

| port | width | meaning |
|---|---|---|
| `clk`, `rst` | 1 | clock; synchronous active-high reset (clears delay line, multiplier registers and `y`) |
| `h0`..`h3` | 32 | signed coefficients, plain inputs; a change applies from the next sample on |
| `x` | 32 | signed sample, one per clock |
| `y` | 64 | signed output |

**Latency.** A sample present before rising edge `t` first contributes to `y`
after edge `t+2`, which is three cycles. The filter takes one sample per
cycle.

**Overflow.** The sum wraps modulo 2^64. This can only happen when all four
products are near their largest value of 2^62.

The port list follows the published filter symbol. The delay line, the adder
chain and the output register are this design's own reading of the
direct-form equation.

## Parameters

| name | default | where |
|---|---|---|
| `N` | 32 | operand width of `RoBA_mul`, `sign_det`, `rounding`, `barrel_shifter`, `sign_set` and `fir` |
| `W` | 64 (`2*N`) | width of `kogge_stone_adder` and `subtractor` |
| `roba_pkg::FIR_TAPS` | 4 | number of taps; the `fir` ports `h0`..`h3` are fixed to four |

`N` may be changed. It must stay at 4 or more, because the rounding equations
reach down to bit `i-2`.

## Where this departs from the published description

- **Example waveform.** The published example waveform shows the *exact*
  product for 0x33333333 x 0x44444444. This design computes the RoBA
  approximation that the method defines. The testbench expects that value,
  999198636824854528.
- **Signed operands only.** An unsigned mode is mentioned but not described,
  and the rounding equations rule it out for operands with the MSB set.
- **Subtractor.** How the subtractor should depend on the operand encodings
  is not described. A plain subtraction is used, which is correct for every
  input.
- **No output rounding in the filter.** A rounding stage on the filter's
  output is mentioned. The 64-bit integer products need none, so there is
  none.
- **Coefficients are ports.** There is no coefficient storage or
  configuration logic.
- **Not included.** The Vedic multiplier that served as the reference point
  for the area and delay comparison is not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/roba_ref_pkg.sv`. That package finds the leading one and compares
against the midpoint, then evaluates `Ar*|B| + Br*|A| - Ar*Br` in 128-bit
arithmetic. It shares no code with the RTL's bit equations.

| testbench | what it covers |
|---|---|
| `tb_rounding` | every value below 4096, values around every midpoint, random values |
| `tb_kogge_stone_adder`, `tb_subtractor` | full carry chains, random operands |
| `tb_barrel_shifter` | every shift amount and zero |
| `tb_sign_det` | corner values (0, -1, the most negative and most positive numbers) and random operands |
| `tb_sign_set` | latency and reset |
| `tb_RoBA_mul` | the 2-cycle latency at one product per cycle; the example above, 3 x 3, -6 x 7 and -2^31 x -2^31; exactness for power-of-two operands; about 5000 random signed pairs |
| `tb_fir` | the full-size filter, described below |

`tb_fir` runs the full-size filter. With power-of-two coefficients it checks
the impulse response and random input against the exact convolution. It then
runs 2000 samples with random coefficients that change every 50 samples, and
a reset in mid-stream. Every output is compared after exactly three cycles.
The testbench counts the following cases and fails if any of them never
occurs:

- rounding up
- rounding down
- the 3 -> 2 exception
- zero operands
- negative products
- negative x negative
- resets
- coefficient changes

## Simulating

With Verilator 5, run from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/roba_pkg.sv tb/roba_ref_pkg.sv tb/tb_fir.sv --top-module tb_fir
    ./obj_dir/Vtb_fir

Replace `tb_fir` with any other testbench name to run that test. Each
testbench runs in well under a second.
