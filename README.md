# Recursive Vedic multiplier, 32 x 32 bits, in three adder flavours

This is an unsigned 32 x 32 -> 64-bit multiplier built on the "vertically and
crosswise" (Urdhva Tiryakbhyam) rule of Vedic arithmetic. To multiply two
numbers, split each into a high and a low half. Multiply the halves
vertically (high*high, low*low) and crosswise (high*low, low*high). Then add
the four partial products, shifted into place. Every half-width multiply is
done the same way, so the design is a recursion: 2 -> 4 -> 8 -> 16 -> 32 bits.
A small 2 x 2 unit made of AND gates and half adders sits at the bottom.

The only thing that changes from level to level is the *adder stage* that joins
four products. The design comes in three flavours that differ only in the
adders used there: carry-save (CSA), carry-lookahead (CLA) and ripple-carry
(RCA). Published FPGA results for this structure rank them as follows. CLA is
the fastest, at about 26.5 ns against about 32.3 ns for CSA and 32.4 ns for
RCA. RCA is the smallest, at about 2000 LUTs against about 3000 for the other
two. Power is about the same for all three. These figures are for reference
only. This RTL has not been synthesised for that part.

The top level, `vedic_mult32_top`, puts all three 32-bit flavours side by
side on the same operands, so they can be compared in one netlist. Each one
is pipelined in two stages.

## The arithmetic at one level

Take 2H-bit operands `X = {xh, xl}` and `Y = {yh, yl}`, with H-bit halves.
The four H x H products are:

| product | operands | width |
|---|---|---|
| `q_hh` | yh * xh | 2H |
| `q_hl` | yh * xl | 2H |
| `q_lh` | yl * xh | 2H |
| `q_ll` | yl * xl | 2H |

`X*Y = q_hh * 2^(2H) + (q_hl + q_lh) * 2^H + q_ll`. The adder stage
(`vedic_combine`) computes this with narrow adders and no 4H-bit adder:

```
 S[H-1:0]    = q_ll[H-1:0]                                (no logic)
 {c1, t}     = q_hl + q_lh                                (2H-bit adder)
 {c2, S[3H-1:H]} = t + {q_hh[H-1:0], q_ll[2H-1:H]}        (2H-bit adder)
 {k1, k0}    = c1 + c2                                    (half adder)
 S[4H-1:3H]  = q_hh[2H-1:H] + {k1, k0}                    (H-bit adder)
```

For the 16-bit level this is two 16-bit adders, one carry merge and one 8-bit
adder. For the 32-bit level it is two 32-bit adders, one carry merge and one
16-bit adder.

### Why the carry merge is a half adder

The usual drawing of this stage merges `c1` and `c2` with a single OR gate.
That works at the 4-bit level, where the two carries are never both set. From
the 8-bit level up, they can both be 1:

- 248 of the 65,536 operand pairs of the 8-bit multiplier;
- about 1.2 % of random 16-bit and 32-bit pairs.

Both carries have weight `2^(3H)`, so an OR then gives a product that is
`2^(3H)` too small. This design merges them with a half adder instead. The
top adder then adds a 2-bit count. This is the one place where the RTL
deliberately departs from the published structure. The testbenches count the
both-carries case and require it to occur. A copy of the stage with an OR gate
fails exactly those cases.

The top adder's own carry out is always 0 for genuine products, because a
product of two 2H-bit numbers fits in 4H bits. It is left unconnected.

## The 2 x 2 leaf

`vedic_mult2` is four AND gates and two half adders:

- `out[0] = a0 b0`;
- `a1 b0 + a0 b1` gives `out[1]` and a carry;
- `a1 b1 + carry` gives `out[2]` (sum) and `out[3]` (carry).

## The three adders

All three have the same interface: `sum + (cout << N) = a + b + cin`. The
multiplier ties `cin` to 0.

- `rca_adder`: N cascaded full adders.
- `cla_adder`: bit generate/propagate terms. Inside a group of `CLA_GROUP`
  (4) bits, every carry is a flat sum of products of the group's carry in.
  Group generate/propagate terms chain the groups together. The group size is
  a choice of this design and lives in `vedic_pkg`.
- `csa_adder`: two stages. First, a carry-save row of full adders turns
  `a`, `b` and `cin` into a partial-sum vector and a carry vector, with no
  sideways carries. Second, a ripple row merges the partial sum with the
  carry vector shifted left by one.

`vedic_adder` picks one of the three by the `KIND` parameter
(`vedic_pkg::adder_kind_e`: `ADDER_RCA`, `ADDER_CLA`, `ADDER_CSA`).
`KIND` is passed down through every level, so one multiplier instance uses
one kind throughout. The CSA flavour is the exception: the final H-bit adder
of each stage is ripple-carry, following the description of that flavour as
"CSA followed by RCA". The default `KIND` everywhere is `ADDER_CLA`, the
fastest flavour.

## Pipelining and interface

`vedic_mult32` has two register stages:

1. The four 16 x 16 products, formed combinationally by four `vedic_mult16`,
   are registered.
2. The 32-bit adder stage runs and the 64-bit product is registered.

A new operand pair can be accepted every clock. The product appears on `s`
with `out_valid` two rising edges after `x`, `y` were presented with
`in_valid`. There is no back-pressure. `rst_n` is an active-low synchronous
reset that clears the valid bits and the data registers. The stage boundary,
the valid flag and the reset are choices of this design. The structure is
described as pipelined, but no register placement is given.

| port (`vedic_mult32_top`) | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset |
| `in_valid` | in | 1 | `x`, `y` hold an operand pair |
| `x`, `y` | in | 32 | unsigned operands |
| `out_valid` | out | 1 | products valid (2-cycle latency) |
| `s_csa`, `s_cla`, `s_rca` | out | 64 | `x*y` from each flavour |

The multipliers below 32 bits (`vedic_mult16`, `vedic_mult8`, `vedic_mult4`,
`vedic_mult2`) and all adders are purely combinational. They can be used on
their own: `s = x * y`.

## Files

| module | role |
|---|---|
| `vedic_pkg` | `adder_kind_e`, `CLA_GROUP` |
| `half_adder`, `full_adder` | bit cells |
| `rca_adder`, `cla_adder`, `csa_adder`, `vedic_adder` | the adders and the kind selector |
| `vedic_mult2` | 2 x 2 leaf |
| `vedic_combine` | adder stage, parameter `H` (half width) |
| `vedic_mult4`, `vedic_mult8`, `vedic_mult16` | combinational levels |
| `vedic_mult32` | 32-bit level, pipelined |
| `vedic_mult32_top` | three flavours side by side |

## Departures and limits

- **Carry merge**: a half adder, not an OR gate (see above). Without this
  change the multiplier gives wrong products.
- **Pipeline**: two stages, placed by this design.
- **Unsigned only**: no signed mode is described.
- **Timing and area** are not modelled. The quoted delays are FPGA
  combinational delays of an unpipelined multiplier. They say nothing about
  the clock rate of this pipelined version.
- **The 4-bit level** combines four 2 x 2 units. It does not use the 7-column
  vertically-and-crosswise procedure. The two compute the same product.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with the simulator's own `+` and `*` and ends with a `TB_RESULT checks=N
failures=M` line.

- Adders: exhaustive at 2 and 8 bits, including carry in, plus 20,000 random
  and corner cases at 32 bits.
- `vedic_mult2`, `vedic_mult4`, `vedic_mult8`: exhaustive, all three
  flavours.
- `vedic_mult16`: 30,000 random and corner pairs.
- `vedic_combine`: exhaustive at H = 4 and random at H = 16.
- `vedic_mult32`, `vedic_mult32_top`: a stream of 5,000 and 20,000 operand
  pairs. It has random gaps, back-to-back pairs, and a reset while products
  are in flight. A scoreboard checks every product and the exact 2-cycle
  latency.
- `tb_vedic_mult32_top` runs the top at its only size. It counts how often
  each of these happens and fails if any never does: the cross-adder carry,
  the middle-adder carry, both carries at once, bubbles, back-to-back
  operands and the reset flush.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vedic_mult32_top \
    -Irtl -y rtl -y tb +libext+.sv rtl/vedic_pkg.sv tb/tb_vedic_mult32_top.sv
./obj_dir/Vtb_vedic_mult32_top
```

Replace the testbench name to run the others. The package file must come
first, because the modules import it.

## Changing it

- Change the default flavour with the `KIND` parameter of `vedic_mult32`, or
  pick any level on its own.
- Change the CLA group size with `CLA_GROUP` in `vedic_pkg`.
- For a 64-bit multiplier, write a level like `vedic_mult16` that
  instantiates four `vedic_mult32` (or their combinational core) and a
  `vedic_combine #(.H(32))`. The adder stage is generic in `H`.
- To change the pipelining, move the registers in `vedic_mult32`. The
  scoreboard testbenches take the latency from their `LATENCY` constant.
