# 4-bit complex multiplier with Baugh-Wooley array multipliers

This design multiplies two complex numbers whose real and imaginary parts are
4-bit two's-complement integers:

    (a + jb)(c + jd) = (ac - bd) + j(ad + bc)

It forms the four products ad, bc, ac and bd in parallel with four identical
4x4 signed array multipliers. A ripple-carry adder then forms ad + bc, and a
ripple-carry subtractor forms ac - bd. A register rank before the multipliers
and one after the adders make it a two-stage pipeline that takes a new operand
set every clock. The whole datapath is built from gates: half adders, full
adders, AND2/NAND2 partial-product gates and D flip-flops. The SystemVerilog
keeps that gate-level structure instead of using `*` and `+`, so the netlist
you get is the array you read about below.

```
          input registers        multipliers      add / subtract     output registers
 a,d --> [fifo 8b] --> x*y = ad --+
 b,c --> [fifo 8b] --> x*y = bc --+--> carryadder --> [fifo 8b] --> q1 = ad + bc
 a,c --> [fifo 8b] --> x*y = ac --+
 b,d --> [fifo 8b] --> x*y = bd --+--> carrysub  ---> [fifo 8b] --> q2 = ac - bd
```

## Ports and timing of `cmult_top`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1 | clock; every flip-flop samples on the rising edge |
| `reset_inv` | in  | 1 | active-low **synchronous** reset of all 48 flip-flops |
| `vdd`       | in  | 1 | logic-1 tie; must be held at 1 (an assertion checks this) |
| `a`,`b`,`c`,`d` | in | 4 each | signed operands, type `cmult_pkg::operand_t` |
| `q1`        | out | 8 | `a*d + b*c`, signed: the **imaginary** part |
| `q2`        | out | 8 | `a*c - b*d`, signed: the **real** part |

- **Latency.** Operands present at rising edge *n* appear on `q1`/`q2` just
  after edge *n+1*. That is two register ranks, with the combinational
  multiply-and-add between them.
- **Throughput.** One result per clock, with no stalls or handshake.
- **Reset.** While `reset_inv` is low at a clock edge, both ranks load zero.
  After reset is released the outputs stay 0 for one more cycle, because the
  zeroed input registers give 0 × 0.
- **Range and overflow.** Each product lies in -56..64. So `q2` is always
  exact (-120..120). `q1` is exact except for one input: a = b = c = d = -8
  gives 128. That wraps to -128, which is what an 8-bit ripple adder produces.
  There is no saturation and no overflow flag.
- **Output names.** The outputs keep the neutral names `q1`/`q2` of the
  original schematic. By the formula above, `q2` is the real part. One block
  diagram of the design labels the adder path "REAL". The formula is
  mathematically unambiguous, so this README follows it.
- **Why `vdd` is a port.** In the schematic the supply net feeds two things:
  the constant-one bit of each multiplier and the carry-in of the subtractor.
  It is brought out so the structure stays visible. Tie it to `1'b1`.

## The signed multiplier (`multiplier`)

This is the part that takes the most care to follow.

**Baugh-Wooley.** Let x and y be 4-bit two's-complement numbers, and let
pp(i,j) = x[i]·y[j] be the partial product with weight 2^(i+j). When exactly
one of i, j is 3 (the sign bit), the partial product has *negative* weight.
Baugh-Wooley removes the negative weights:

- Replace each of those six partial products by its complement, so an AND2
  becomes a NAND2.
- Add the constant 2^4 + 2^7 to correct the sum.

After that, every term is a positive bit and an ordinary unsigned adder array
gives the correct 8-bit two's-complement product.

The 16 partial products are:

- 10 AND2 gates: the 9 with i, j < 3, plus sign × sign.
- 6 NAND2 gates: sign × non-sign, in either order.

The two correction bits are handled like this:

- **2^4** is one input of the weight-4 full adder in the first row, fed by `vdd`.
- **2^7** is added by inverting the final carry. That carry is the only other
  bit of weight 7, and `~c` is the low bit of `c + 1`.

**Array.** The partial products are summed by 12 one-bit adders in three rows.
Each row has three full adders and one half adder:

| row | weights | role |
|-----|---------|------|
| 1 | 1–4 | half adder on column 1. Full adders take three partial products each in columns 2, 3 and 4; the 2^4 constant is the third input in column 4 |
| 2 | 2–5 | adds row 1's sums and carries, the remaining sign-row partial products pp(0,3) and pp(1,3), and in column 5 pp(3,2) and pp(2,3) |
| 3 | 3–6 | a ripple-carry row that resolves the remaining carries; column 6 also takes pp(3,3) |

The product bits come from these places:

| bit | source |
|-----|--------|
| z[0] | pp(0,0) |
| z[1] | row 1 |
| z[2] | row 2 |
| z[3] to z[6] | row 3 |
| z[7] | the inverted final carry |

The gate count is 10 AND2, 6 NAND2, 9 full adders, 3 half adders and
1 inverter. This matches the original design. Its schematic also shows three
rows of three full adders and a half adder, with the supply on a first-row
adder and the inverter on the MSB. Within those constraints, which bit enters
which adder input is this implementation's own assignment, made by weight. The
exhaustive test confirms it for all 256 operand pairs.

The multiplier is fixed at 4x4 and has no width parameter.

## Adders

- `carryadder`: WIDTH-bit ripple-carry adder. Bit 0 is a half adder and bits
  1..WIDTH-1 are full adders.
- `carrysub`: computes `a + ~b + cin`. Each bit of b goes through an inverter
  into a full adder, and cin enters bit 0. With cin = 1 this is `a - b`.
- `fulladder`: two XOR2, two AND2 and one OR2.
- `halfadder`: one XOR2 and one AND2.

In both multi-bit adders the carry out of the top bit is dropped, so results
wrap modulo 2^WIDTH. Both default to WIDTH = 8.

## The buffer registers (`fifo`, `dflipflop`)

Despite the name, `fifo` holds **one** word. It is WIDTH = 8 D flip-flops on a
common clock, with no pointers and no full/empty flags: a pipeline register.
The same module is used in two places:

- on the input side, holding `{x, y}` for one multiplier;
- on the output side, holding one 8-bit result.

`dflipflop` is a rising-edge flip-flop with synchronous active-low reset.

The original cells also have an inverted-clock pin (`clk_inv`). It exists
only for the transistor-level master-slave latch, which needs both clock
phases. It adds no logical function, so it is not a port here. At gate level
you would derive it locally as `~clk`.

## Where this RTL departs from, or adds to, the original design

- The `clk_inv` pins are not modelled (see above).
- Reset is synchronous. The original cell behaviour samples reset only on the
  clock edge.
- The wiring inside the multiplier array is this implementation's own, within
  the published gate counts and row structure.
- The outputs are named `q1`/`q2`, and the real/imaginary labels follow the
  formula (see *Ports and timing*).
- `cmult_pkg` holds the operand and result types. The assertion on `vdd` is an
  addition.
- Not covered: the transistor-level cells, the layout and floor plan, and the
  area and power estimates. None of them has an RTL counterpart.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values are
computed independently, from integer arithmetic in the testbench. Each
testbench ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|-----------|----------------|
| `tb_halfadder`, `tb_fulladder` | exhaustive truth tables |
| `tb_dflipflop` | random data with random resets; checks that reset acts only at the edge |
| `tb_fifo` | all 256 words, then random words with random resets; one-cycle latency |
| `tb_carryadder` | all 65 536 operand pairs, plus signed examples, including the wrap 127 + 1 = -128 |
| `tb_carrysub` | all 65 536 pairs with cin = 0 and with cin = 1, plus signed examples |
| `tb_multiplier` | all 256 signed operand pairs, including (-8)(-8) = 64 and (-8)(7) = -56 |
| `tb_cmult_top` | see below |

`tb_cmult_top` runs the full design at its default sizes:

- a few hand-worked operand sets, for example
  (1 + 6j)(1 + 3j) → q2 = -17, q1 = 9;
- then all 65 536 operand combinations, one per clock, with a reset in the
  middle of the stream.

It checks every output against a two-deep reference pipeline, which confirms
the two-cycle latency and the one-per-clock rate. It also requires that each
of these happened at least once: back-to-back results, a reset flush,
negative values on both outputs, and the single overflow case.

## Simulating

All RTL is in `rtl/`, one module or package per file. Load the package first.
For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/cmult_pkg.sv tb/tb_cmult_top.sv --top-module tb_cmult_top
./obj_dir/Vtb_cmult_top
```

Swap in another `tb_<module>.sv` and its top module to test a single block.
Every testbench finishes in well under a second.

To change the adder width, set the `WIDTH` parameter of `carryadder`,
`carrysub` and `fifo`. The top derives its widths from `cmult_pkg`
(`IN_W = 4`, `OUT_W = 8`). Because the multiplier is a fixed 4x4 array,
changing `IN_W` also requires a new multiplier.
