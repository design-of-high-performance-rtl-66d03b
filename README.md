# 8-bit Vedic multiplier (Urdhva-Tiryakbhyam)

A combinational 8x8 → 16-bit unsigned multiplier built on the "vertically and
crosswise" (Urdhva-Tiryakbhyam) rule of Vedic arithmetic. Instead of
summing eight shifted rows of partial products, as an array multiplier does,
it cuts each operand in half. It forms the four half-width products in
parallel and adds them with three adders. Each half-width product is built
the same way one level down, so the only cells in the circuit are AND gates,
half adders and full adders.

## The vertically-and-crosswise split

Write the operands as `a = aH·16 + aL` and `b = bH·16 + bL`, with 4-bit
halves. Then

    a·b = aH·bH·256 + (aH·bL + aL·bH)·16 + aL·bL

The two outer terms are the *vertical* products (high with high, low with
low). The middle two are the *crosswise* products. `vedic_mult_8x8` computes

| signal  | value                         | width |
|---------|-------------------------------|-------|
| `q0`    | `a[3:0] * b[3:0]`             | 8     |
| `q1`    | `a[7:4] * b[3:0]`             | 8     |
| `q2`    | `a[3:0] * b[7:4]`             | 8     |
| `q3`    | `a[7:4] * b[7:4]`             | 8     |
| `s_hi`  | `{q3, 4'b0} + {4'b0, q2}`     | 12    |
| `s_mid` | `q1 + {4'b0, q0[7:4]}`        | 8     |
| `q`     | `{s_hi + {4'b0, s_mid}, q0[3:0]}` | 16 |

The grouping is the part that needs a second look. The low nibble of `q0` is
already final, so it goes straight to `q[3:0]`. Everything else is shifted
right by four bits. That is why one crosswise product is added to the high
vertical product and the other to the top nibble of the low one. Both sums,
and the final one, fit their adders for every input: the largest case,
`255·255 = 65025`, gives `s_hi = 3825`, `s_mid = 240` and `q[15:4] = 4064`.
The carry outs of all three adders are therefore always zero. An immediate
assertion in each multiplier checks this during simulation.

`vedic_mult_4x4` applies the same split to 4-bit operands. Its 2-bit halves
go into four `vedic_mult_2x2` cells, and 6-, 4- and 6-bit adders combine the
results. A 2x2 cell is the rule in its smallest form:

- `a0·b0` gives bit 0.
- A half adder sums the two crosswise terms `a1·b0` and `a0·b1` into bit 1
  and a carry.
- A second half adder sums `a1·b1` and that carry into bits 2 and 3.

## Hierarchy

    vedic_mult_8x8            top: a[7:0], b[7:0] -> q[15:0]
    ├── vedic_mult_4x4 ×4     q0..q3
    │   ├── vedic_mult_2x2 ×4
    │   │   └── half_adder ×2
    │   └── rc_adder ×3       WIDTH 6, 4, 6
    │       └── full_adder
    └── rc_adder ×3           WIDTH 12, 8, 12
        └── full_adder

`rc_adder` is a ripple-carry chain of `WIDTH` full adders with no carry in.
It has a `cout` port. `WIDTH` defaults to 12, the widest adder in the top.

## Interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`  | in  | 8  | multiplicand, unsigned |
| `b`  | in  | 8  | multiplier, unsigned   |
| `q`  | out | 16 | product `a*b`          |

That is 32 I/O bits, with no clock and no reset. The product is valid one
propagation delay after the operands change. It is not registered, and it has
no handshake or valid signal. To use the multiplier in a pipeline, add
registers around it.

The critical path runs through:

1. a 2x2 cell;
2. two ripple adders inside a 4x4 block;
3. the 12-bit `s_hi` adder;
4. the 12-bit final adder.

A reported FPGA implementation of this architecture (Xilinx flow, 140 LUTs,
32 I/O) gave 9.232 ns. Array, shift-and-add and Wallace-tree 8-bit
multipliers measured in the same comparison gave 13.900, 12.163 and
11.591 ns. These numbers come from that flow and were not reproduced here.
Zero-delay simulation cannot show them, and the ripple-carry adders used here
are not tuned for delay.

## What is given and what was chosen

These parts follow the published architecture:

- the split into 4-bit halves;
- the four 4x4 blocks and which operand halves feed each;
- the three adders and the zero-filled concatenations at their inputs;
- taking `q[3:0]` directly from the low product and `q[15:4]` from the last
  adder;
- two 8-bit operands and a 16-bit result, 32 I/O in all.

These are this design's own choices:

- **Inside of the 4x4 block.** It is only specified as a 4x4 Vedic multiply.
  It is built here by the same split, down to 2x2 cells.
- **Adder type.** Only "adders" are called for. Ripple-carry is the simplest
  choice. Replacing `rc_adder` with a carry-lookahead or prefix adder of the
  same ports is the obvious way to cut delay.
- **Unsigned operands.** Signed multiplication would need a
  Baugh-Wooley-style correction, which is not built.
- **Purely combinational.** There are no registers, because no clock or
  pipeline is specified.
- **Naming of the crosswise products.** Swapping which one is called `q1` and
  which `q2` does not change the product.
- **The `cout` port** on the adder and the overflow assertions.

## Verification

Each testbench applies operands on the falling edge of a free-running check
clock and compares on the next rising edge. It ends with a line
`TB_RESULT checks=N failures=M`. A watchdog stops a run that hangs.

- `tb_rc_adder`: the 12-bit adder gets corner cases, including a full carry
  ripple into `cout`, and 5,000 random pairs. A 4-bit instance is checked
  exhaustively.
- `tb_vedic_mult_4x4`: all 256 operand pairs.
- `tb_vedic_mult_8x8`: all 65,536 operand pairs at the design's only size.
  From the operands alone, the testbench also counts how often each step of
  the assembly does real work:
  - each of the four partial products is nonzero;
  - the middle sum reaches past bit 7;
  - the final adder carries into the high product's bits.

  A step that never happens counts as a failure.

Each testbench was also run against a copy of its module with a deliberate
fault, and it failed:

| testbench | fault | failing checks |
|-----------|-------|----------------|
| `tb_rc_adder` | carry chain cut at bit 6 | 2,464 |
| `tb_vedic_mult_4x4` | `m0[1:0]` added in place of `m0[3:2]` | 144 |
| `tb_vedic_mult_8x8` | `q0[3:0]` added in place of `q0[7:4]` | 57,600 |

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        --top-module tb_vedic_mult_8x8 tb/tb_vedic_mult_8x8.sv
    ./obj_dir/Vtb_vedic_mult_8x8

The exhaustive 8x8 run takes well under a second.
