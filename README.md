# 128 x 128-bit Vedic multiplier

A purely combinational unsigned multiplier that takes two 128-bit operands and
produces their 256-bit product. It is built on the Urdhva-Tiryagbhyam
("vertically and crosswise") rule of Vedic arithmetic: every partial product of
a column is formed at once, and the column sums are then combined with carries
moving left. In hardware this turns into a divide-and-conquer tree. A 2x2-bit
cell sits at the leaves. At each level above it, four half-size multipliers
feed three ripple-carry adders: 4x4 from 2x2, then 8x8, 16x16, 32x32, 64x64,
and finally 128x128.

There is no clock, register or handshake. The product is valid once the logic
has settled.

## The rule, on a decimal example

To multiply 252 by 846, work on digit columns from the right, carrying
whatever exceeds one digit:

| step | cross products                  | + carry in | total | digit out | carry out |
|------|---------------------------------|-----------:|------:|----------:|----------:|
| 1    | 2*6 = 12                        | 0          | 12    | 2         | 1         |
| 2    | 5*6 + 2*4 = 38                  | 1          | 39    | 9         | 3         |
| 3    | 2*6 + 5*4 + 2*8 = 48            | 3          | 51    | 1         | 5         |
| 4    | 2*4 + 5*8 = 48                  | 5          | 53    | 3         | 5         |
| 5    | 2*8 = 16                        | 5          | 21    | 21        |           |

The result is 213192. Steps 1 and 5 are "vertical" products and steps 2 to 4
are "crosswise" ones. In binary, with two-digit operands, this becomes the 2x2
cell. With operands split into halves it becomes the recombination network
described below. The end-to-end testbench runs this example.

## The 2x2 cell (`vedic_2x2`)

For a = a1a0 and b = b1b0, four AND gates form a0b0, a1b0, a0b1 and a1b1, and
two half adders (`half_adder`) add them:

```
s0      = a0b0              vertical
{c1,s1} = a1b0 + a0b1       crosswise, half adder 1
{c2,s2} = c1   + a1b1       vertical,  half adder 2
p       = {c2, s2, s1, s0}
```

The cell is the same circuit as a 2x2 array multiplier. Its delay is one AND
gate plus two half adders.

## Recombination: four half products, three adders

This is the part worth reading carefully. It is the same at every level, in
`vedic_nxn` (any power-of-two N) and in the top `vedic_128x128` (N = 128).
Split each N-bit operand into halves of H = N/2 bits, a = {aH, aL} and
b = {bH, bL}. Then

    a*b = hh * 2^N + (hl + lh) * 2^H + ll

with ll = aL*bL, hl = aH*bL, lh = aL*bH and hh = aH*bH, each N bits wide.
Three N-bit ripple-carry adders add these partial products:

```
adder 1:  {ca1, mid} = hl + lh                                  (crosswise pair)
adder 2:  {ca2, low} = mid + {H zeros, ll[N-1:H]}               (carry in ll's upper half)
adder 3:  {ca3, hi } = hh  + {H-1 zeros, ca1|ca2, low[N-1:H]}   (carry into hh)

p[H-1:0]   = ll[H-1:0]      taken straight from the low product
p[N-1:H]   = low[H-1:0]
p[2N-1:N]  = hi
```

Bit for bit, with N = 4 and 2x2 cells, the four sub-multipliers take
(a1a0, b1b0), (a3a2, b1b0), (a1a0, b3b2) and (a3a2, b3b2). The output bits are
s1 s0 = ll[1:0], s3 s2 = low[1:0] and s7..s4 = hi. With N = 8 and 4x4 blocks
the same pattern gives s(3-0), s(7-4) and s(15-8).

**The carry out of adder 2.** Both ca1 and ca2 have weight 2^(N+H), so both
belong in bit H of adder 3's second operand. The well-known drawings of this
architecture pass ca1 there and leave ca2 unconnected. That gives a wrong
product whenever ca2 = 1. The smallest case is 14 * 15 at 4x4: with ca2
dropped the result is 146 instead of 210. Here ca2 is ORed with ca1. The OR is
exact because the two can never be 1 together:
hl + lh + (ll >> H) <= 2(2^H - 1)^2 + 2^H - 1 < 2^(N+1). So the full sum fits
in N+1 bits and holds at most one carry of that weight. The operands
a = {all ones, 2} and b = all ones make ca2 fire at any N. The testbenches use
them.

**The carry out of adder 3** (ca3) is always 0, because an N x N product fits
in 2N bits. It is left unconnected.

## Hierarchy and cost of the 128x128 instance

| level   | module                     | copies | each contains                            |
|---------|----------------------------|-------:|------------------------------------------|
| 128x128 | `vedic_128x128`            | 1      | 4 x `vedic_nxn #(64)`, 3 x 128-bit adder |
| 64x64   | `vedic_nxn #(64)`          | 4      | 4 x 32x32, 3 x 64-bit adder              |
| 32x32   | `vedic_nxn #(32)`          | 16     | 4 x 16x16, 3 x 32-bit adder              |
| 16x16   | `vedic_nxn #(16)`          | 64     | 4 x 8x8, 3 x 16-bit adder                |
| 8x8     | `vedic_nxn #(8)`           | 256    | 4 x 4x4, 3 x 8-bit adder                 |
| 4x4     | `vedic_nxn #(4)`           | 1024   | 4 x `vedic_2x2`, 3 x 4-bit adder         |
| 2x2     | `vedic_2x2`                | 4096   | 4 AND gates, 2 x `half_adder`            |

Altogether the design has 24,192 full-adder bits in ripple-carry adders and
8,192 half adders. Generic synthesis maps it to about 121,000 two-input gates
(roughly 61k AND, 15k OR, 46k XOR).

The critical path is long. It runs through a 2x2 cell and then, at each of the
six levels, through chained ripple-carry adders whose widths double from level
to level. No timing figure is claimed here, because delay depends entirely on
the technology. The structure is meant for study and for comparison with
array or Booth multipliers, not as a fast 128-bit multiplier.

## Modules

| file                         | module               | parameters (default)  | ports |
|------------------------------|----------------------|-----------------------|-------|
| `rtl/half_adder.sv`          | `half_adder`         | none                  | `a`, `b` → `sum`, `carry` |
| `rtl/vedic_2x2.sv`           | `vedic_2x2`          | none                  | `a[1:0]`, `b[1:0]` → `p[3:0]` |
| `rtl/ripple_carry_adder.sv`  | `ripple_carry_adder` | `W` (128)             | `a[W-1:0]`, `b[W-1:0]`, `cin` → `sum[W-1:0]`, `cout` |
| `rtl/vedic_nxn.sv`           | `vedic_nxn`          | `N` (64), power of 2  | `a[N-1:0]`, `b[N-1:0]` → `p[2N-1:0]` |
| `rtl/vedic_128x128.sv`       | `vedic_128x128`      | none                  | `a[127:0]`, `b[127:0]` → `p[255:0]` |

`vedic_nxn` instantiates itself with N/2. At N = 4 its sub-multipliers are
`vedic_2x2` cells. It also accepts N = 2, where it is the 2x2 cell alone. Any
other N that is not a power of two stops elaboration with an error. To build a
multiplier of another size, instantiate `vedic_nxn` with that N. The top is
the 128-bit case written out, with its own recombination network.

`ripple_carry_adder` computes each bit as a full adder with a rippling carry.
It has a carry input, which every instance in this design ties to 0.

## Where this design departs from the reference architecture

- ca2 is routed into the last adder (see above). Without this change the
  multiplier is wrong for some operands.
- The adders are written as chains of full adders. The reference architecture
  names them as ripple-carry adders without giving their cells.
- Operands are unsigned. Signed multiplication is not provided.
- The block-level timing and FPGA utilisation reported for the reference
  implementation are not reproduced: 211.554 ns for the 128x128 path, and
  4.12 ns (4x4) and 21.21 ns (8x8) on a small Xilinx Spartan FPGA.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench               | what it does |
|-------------------------|--------------|
| `tb_half_adder`         | all 4 input pairs |
| `tb_vedic_2x2`          | all 16 operand pairs |
| `tb_ripple_carry_adder` | W=4 exhaustively (512 cases with cin); W=128 with full-length carry ripples and 2000 random sums |
| `tb_vedic_nxn`          | N=4 and N=8 exhaustively; N=16 and N=64 with corner cases, the ca2 case and 3000 random pairs; counts from the operands how often ca1 and ca2 are exercised and fails if either never is |
| `tb_vedic_128x128`      | full-size end-to-end test: 252*846, zero, one, all ones, two ca2 cases and 5000 random pairs against a 256-bit reference product; counts the top-level ca1/ca2 events and fails if either never happens |

References are computed with the simulator's own wide multiplication, so they
do not depend on the design. If ca2 is dropped, as in the usual drawing, the
directed ca2 case fails in both multiplier testbenches.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
          --top-module tb_vedic_128x128 tb/tb_vedic_128x128.sv
./obj_dir/Vtb_vedic_128x128
```

The full 128x128 model takes about three minutes to compile, because it
flattens into some 120k gates. It then simulates 5000 products in under a
second. The smaller testbenches compile in seconds to a minute.

Verilator's `--lint-only -Wall` reports the sub-products of `vedic_nxn` as
undriven when that module is linted as a top on its own. It does not expand
the module's instantiations of itself in that mode. Linting
`vedic_128x128`, or any testbench, elaborates the whole tree. The only
warnings left are the intentionally unused ca3 carries.
