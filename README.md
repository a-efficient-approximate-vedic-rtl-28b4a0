# AVMT: a 4-bit approximate Vedic multiplier

This is a 4x4-bit unsigned multiplier that gives up a little accuracy to save
logic. It follows the Urdhva Tiryakbhyam ("vertically and crosswise") scheme
of Vedic arithmetic. The product is assembled from 2x2 sub-products. Each 2x2
sub-multiplier adds its partial products with *approximate* half adders: the
sum bit is an OR where an exact adder would use an XOR. The 4x4 multiplier
uses four such sub-multipliers, so eight XOR gates become eight OR gates. The
adders that combine the sub-products are exact.

The result is right for 207 of the 256 operand pairs and too large for the
other 49 (19 %). That is good enough for error-tolerant work such as
multiplicative image blending. The design is purely combinational, with no
clock and no reset.

## The approximate half adder

| a | b | exact {c,s} | approximate {c,s} | exact − approximate |
|---|---|-------------|-------------------|---------------------|
| 0 | 0 | 00 | 00 | 0 |
| 0 | 1 | 01 | 01 | 0 |
| 1 | 0 | 01 | 01 | 0 |
| 1 | 1 | 10 | 11 | −1 |

`sum = a | b` and `carry = a & b`. The adder fails only when both inputs are 1.
Then it returns 3 instead of 2 (`rtl/approx_half_adder.sv`).

## AVM2: the 2x2 building block

For operands `a1a0` and `b1b0`, four AND gates (`rtl/partial_product_gen.sv`)
form the partial products. Two approximate half adders then sum them:

```
p0        = a0b0                     right column, vertical
{c1, p1}  = a1b0 (+) a0b1            middle column, crosswise
{p3, p2}  = a1b1 (+) c1              left column, vertical, plus the carry
```

Here `(+)` is the approximate half adder. The crosswise products are both 1
only when a = b = 3. Only then does the first adder see 1 + 1, which gives
`p1 = 1, c1 = 1`. The second adder then sees `a1b1 = 1` and `c1 = 1` and gives
`p2 = p3 = 1`. So **3 x 3 yields 15 instead of 9, and every other 2x2 product
is exact** (`rtl/avm2.sv`).

## AVMT: four AVM2s and an exact adder tree

Split the operands into halves `aH = a[3:2]`, `aL = a[1:0]`, and likewise for
`b`. Then:

```
q0 = AVM2(aL, bL)   weight 1        q1 = AVM2(aL, bH)   weight 4
q2 = AVM2(aH, bL)   weight 4        q3 = AVM2(aH, bH)   weight 16

z[1:0]        = q0[1:0]
{c1, s1}      = q1 + q2                       4-bit binary parallel adder
{c2, z[5:2]}  = s1 + {q3[1:0], q0[3:2]}       4-bit binary parallel adder
{hc, hs}      = c1 + c2                       exact half adder
z[7:6]        = q3[3:2] + {hc, hs}            2-bit binary parallel adder
```

The binary parallel adders (`rtl/bin_par_adder.sv`) are ripple-carry chains of
full adders (`rtl/full_adder.sv`). The exact half adder is in
`rtl/half_adder.sv`, the top in `rtl/avmt.sv`, and the shared widths and types
in `rtl/avmt_pkg.sv`.

### Where the errors come from

An AVM2 is wrong only for 3 x 3, and then by +6. So the 4x4 product is wrong
when one of the four sub-products pairs a half equal to 3 with another half
equal to 3. That happens exactly when some half of `a` is 3 and some half of
`b` is 3. Seven of the sixteen 4-bit values have a half equal to 3, so
7 x 7 = 49 operand pairs are affected. The sub-product errors are all
positive, so they never cancel. Among all 256 pairs, the mean absolute error
is 11.1 and the largest is 160.

### Product wrap-around

The product port is eight bits wide. With exact sub-products the sum always
fits. With approximate ones it can exceed 255: 15 x 15 sums to 375, for
example. The carry out of the 2-bit adder is dropped, so these 13 operand
pairs (12..15 x 12..15, apart from the three smallest) wrap modulo 256.
15 x 15 therefore returns 119 rather than 225. The dropped carry is the
internal net `top_carry` in `avmt`. If your application cannot tolerate the
wrap, bring it out as a ninth product bit or saturate on it.

## Interface and timing

```
module avmt (input  logic [3:0] a,    // unsigned multiplicand
             input  logic [3:0] b,    // unsigned multiplier
             output logic [7:0] z);   // approximate product
```

The output is valid one combinational delay after the inputs settle. The
original authors report 48 LUTs and a 3.61 ns delay on a Xilinx FPGA. The same
report gives 54 LUTs and 4.12 ns for an exact Vedic multiplier, and 50 LUTs
and 3.97 ns for an array multiplier. These numbers come from their synthesis
flow, not from this RTL.

## How this RTL relates to the published design

The following parts follow the original description:
- the approximate half adder;
- the AVM2 structure (four AND gates and two approximate half adders);
- the two-stage AVMT: four AVM2s, two 4-bit parallel adders, one half adder
  and one 2-bit parallel adder, with its output bit positions;
- the 49-in-256 error count, which this RTL reproduces exactly. The published
  percentage, 18 %, is slightly lower than 49/256.

Choices made here, where the published description is not explicit:
- **Adder tree wiring.** The block diagram does not show clearly which signal
  goes to each adder input. The tree above is the standard 4x4 Vedic
  arrangement, and it gives the published error count.
- **Second-stage adders.** They are exact. So is the half adder on the two
  carries. The description counts eight XOR-to-OR replacements in total, which
  are the eight inside the AVM2s.
- **Adder structure.** The adders are ripple-carry. The description only calls
  them "binary parallel adders".
- **Overflow.** The carry beyond bit 7 is discarded (see the wrap-around
  section above).
- **Operands and timing.** Operands are unsigned, and the circuit has no
  pipeline registers.

The published evaluation blends real photographs. Those images are not part
of this package, and the blending itself was a software experiment, not a
hardware unit. The bench `tb/tb_image_blend.sv` runs a stand-in. It generates
four pairs of synthetic 64x64 8-bit images and keeps the upper 4 bits of each
pixel. It then multiplies pixel by pixel through `avmt` and through exact
arithmetic, and compares the two results with SSIM over 8x8 windows. Its SSIM
values (0.87 to 1.0 for these images) describe the synthetic images only.

## Simulating

Each testbench checks its results and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/avmt_pkg.sv \
          tb/tb_avmt.sv --top-module tb_avmt -Mdir obj_avmt
./obj_avmt/Vtb_avmt
```

| bench | what it covers |
|-------|----------------|
| `tb_avmt` | all 256 operand pairs against an integer model; checks the 49-error count; counts approximated, exact and wrapped products |
| `tb_image_blend` | multiply-blend workload on synthetic images, with SSIM |
| `tb_avm2` | all 16 pairs; 3 x 3 -> 15, all others exact |
| `tb_bin_par_adder` | exhaustive at widths 4 and 2, carry in 0 and 1 |
| `tb_approx_half_adder`, `tb_half_adder`, `tb_partial_product_gen` | truth tables |

Every bench has a time-based watchdog and finishes in well under a second.

## Changing it

The operand and product widths live in `avmt_pkg`. The structure of `avmt`
is written for exactly 4 bits. An 8-bit version would use four `avmt`
instances in the same vertical/crosswise arrangement, with wider parallel
adders. To trade accuracy back for exactness, replace `approx_half_adder` with
`half_adder` in one or both positions of `avm2`.
