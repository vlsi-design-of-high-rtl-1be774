# 16x16-bit multiplier-accumulator with a variable-latency carry-skip adder

Multiply-accumulate (`acc <- acc + a*b`) is the inner loop of FIR filters,
FFTs, DCTs and convolutions. This MAC unit computes it with three plain
blocks chained in a loop:

```
 dataa, datab (16 b)
        |
  [ array multiplier ]      16x16 -> 32-bit unsigned product
        |
  [ carry-skip adder ] <--+ 32-bit sum of product and accumulator
        |                 |
  [  accumulator     ] ---+ register, cleared by reset
        |
  dataout (32 b), carryout
```

The multiplier is a regular AND-plane / ripple-row array. The adder in the loop
is where the speed comes from: a carry-skip adder whose carry chain is short in
almost every case. The default adder is a *hybrid variable-latency
concatenation-incrementation carry-skip adder* (CI-CSKA). Its middle stage is a
Brent-Kung prefix adder. A predictor spots the rare operands that would use the
long carry path and gives those additions two clock cycles instead of one.
A parameter can select instead the same CI-CSKA without the prefix stage, or a
conventional carry-skip adder.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | adder selection enum, default sizes of the 32-bit hybrid adder |
| `rtl/mac_unit.sv` | top: pipeline, stall control, adder selection |
| `rtl/array_multiplier.sv` | unsigned N x N array multiplier |
| `rtl/cska_hybrid.sv` | hybrid variable-latency CI carry-skip adder |
| `rtl/bk_ppa.sv` | Brent-Kung prefix adder used as the hybrid adder's nucleus stage |
| `rtl/cska_conv.sv` | conventional carry-skip adder (RCA blocks and 2:1 skip multiplexers) |
| `rtl/rca.sv`, `rtl/full_adder.sv`, `rtl/half_adder.sv` | ripple-carry adder and its cells |
| `rtl/accumulator.sv` | accumulator register |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_mac_full` |

## The carry-skip adders

### Conventional carry-skip adder (`cska_conv`)

The 16-bit adder is four 4-bit ripple-carry blocks. Beside each block, XOR
gates form the bit propagates `a[i]^b[i]` and an AND gate combines them into the
block propagate. When the whole block propagates, its carry out equals its
carry in. A 2:1 multiplexer steered by the block propagate then passes the
incoming carry straight to the next block and skips the ripple chain.
Otherwise the multiplexer takes the ripple carry. The worst case is a carry
generated in the first block, skipped across the middle blocks, and rippled
through the last one. `WIDTH` and `BLOCK` are parameters. The MAC unit uses a
32-bit instance made of eight 4-bit blocks.

### Concatenation-incrementation stages (`cska_hybrid`)

The hybrid adder splits the operands into stages of different sizes, listed
least significant first in `STAGE_W`. There are three kinds of stage:

1. **Stage 1** is an ordinary ripple-carry adder fed by the adder's carry in.
2. **CI stages** (all others except the nucleus). The stage's ripple-carry
   adder starts with a carry in of **zero**. It therefore does not wait for the
   stages below, and all stages compute their partial sums at the same time
   (the "concatenation"). Its carry out is then exactly the stage's group
   generate. The skip logic forms the carry into the next stage as
   `C_next = C_rca | (P_stage & C_in)`, where `P_stage` is the AND of the
   stage's bit propagates. An **incrementation block** finally adds `C_in` to
   the partial sum. The RCA carry is therefore never on the path between
   stages: only the AND-OR skip gates are.
3. **The nucleus stage** (index `NUCLEUS`) is a modified Brent-Kung
   parallel-prefix adder (`bk_ppa`):
   - Preprocessing forms the bit generate and propagate signals.
   - An up-sweep tree gives the full-width prefix after log2(W) levels, and a
     down-sweep fills in the intermediate prefixes.
   - Postprocessing combines the prefixes with the stage's carry in to form the
     sum bits.
   - The adder is "modified" in that it produces no carry out of its own. It
     hands its group generate `G` and group propagate `P` to the same AND-OR
     skip logic as the CI stages.

With `NUCLEUS = 0` there is no nucleus: every stage after the first is a CI
stage, which gives the plain CI-CSKA. Its carry path between stages is only the
chain of AND-OR skip gates, and it always completes in one cycle.

Stage sizes grow towards the nucleus and shrink after it:

| instance | stages (LSB first) | nucleus bits |
|---|---|---|
| 16-bit default | 3, 4, **4**, 3, 2 | [10:7] |
| 32-bit, inside the MAC | 4, 5, 6, **8**, 5, 4 | [22:15] |

### Variable latency

The longest path is this: a carry is generated in a low stage, passes the skip
logic of the nucleus, and ends in the incrementation block of the top stage.
It can only happen when every bit of the nucleus propagates. The adder's
`two_cycle` output is the nucleus group propagate. With random operands it is
high for about 1 addition in 2^8 in the 32-bit instance. When `two_cycle` is
high, the MAC unit holds the adder's inputs for one more cycle and loads the
accumulator on the second cycle. In a netlist this makes the long path a
two-cycle path, so the clock period only has to cover the short paths. The RTL
sum itself is always correct after one cycle, so the stall only matters for
timing. A timing flow must be given the matching multicycle constraint for the
long path.

## Array multiplier

`array_multiplier` forms N^2 partial-product bits `a[j] & b[i]` with AND gates.
Row 0 is `a & b[0]`. Each of the N-1 following rows is an N-bit ripple adder
(a half adder at the bottom, full adders above it). It adds the next partial
product to the running sum shifted right by one place. The bit that falls out
of each row is the next product bit, and the last row gives the top N bits.
All shifts are wiring. The worst-case delay grows as about (2N-3) carry delays
plus (N-1) sum delays. Operands are unsigned.

## MAC pipeline, interface and timing

`mac_unit` has three stages:

| stage | registers | logic |
|---|---|---|
| 1 | `dataa_q`, `datab_q` | captures an operand pair when `in_valid && in_ready` |
| 2 | `mult_q` | array multiplier |
| 3 | accumulator | carry-skip adder of `acc + mult_q` |

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active high; empties the pipeline and clears the accumulator and `carryout` |
| `in_valid` / `in_ready` | in / out | 1 | valid-ready handshake for the operand pair. `in_ready` is low only during the extra cycle of a two-cycle addition |
| `dataa`, `datab` | in | N | operands (unsigned) |
| `dataout` | out | ACC_W | running sum, modulo 2^ACC_W |
| `carryout` | out | 1 | carry out of the most recent accumulation (bit ACC_W of `acc + product`) |
| `out_valid` | out | 1 | one-cycle pulse each time the accumulator has been updated |
| `two_cycle_add` | out | 1 | high during the stall cycle of a two-cycle addition |

Timing:

- **Throughput.** One pair can be accepted per cycle.
- **Latency.** A pair accepted at rising edge k is included in `dataout` after
  edge k+2, and `out_valid` is high in the cycle after that edge. Each
  two-cycle addition still in flight adds one edge and stalls the whole
  pipeline for that cycle.
- **New accumulation.** Start one with `rst`; there is no separate clear.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | operand width |
| `ACC_W` | 2N = 32 | accumulator and adder width |
| `ARCH` | `ARCH_HYBRID_CSKA` | `ARCH_CI_CSKA` selects the CI-CSKA without nucleus, `ARCH_CONV_CSKA` the conventional adder; neither ever stalls |
| `CONV_BLOCK` | 4 | block size of the conventional adder |
| `HYB_NSTAGE`, `HYB_STAGE_W`, `HYB_NUCLEUS` | 6, {4,5,6,8,5,4}, 3 | stage plan of the CI and hybrid adders; the stage widths must add up to `ACC_W` |

An elaboration-time assertion checks that the stage widths add up to `ACC_W`.
If you change `N` or `ACC_W` with the hybrid adder selected, give a matching
stage plan.

## What follows the source design and what is this implementation's own

These parts follow the design as published:

- the multiplier-adder-accumulator loop;
- the 16x16-bit array multiplier built from AND gates and ripple rows of full
  and half adders;
- the conventional 16-bit carry-skip adder of four 4-bit RCA blocks, with XOR
  and AND propagate logic and 2:1 skip multiplexers;
- the hybrid adder's stage structure: an RCA first stage, then CI stages with
  skip logic and incrementation blocks, a Brent-Kung prefix nucleus, and a
  one-cycle/two-cycle prediction;
- an accumulator that is cleared when reset is high.

These are this implementation's own choices, because the source leaves them
open:

- **The adder in the loop is 32 bits wide.** It must add a 32-bit product to
  the accumulator. "16-bit" is read as the operand width of the MAC.
- **Accumulator width.** 32 bits that wrap, with the carry of the latest
  addition on `carryout`. There are no guard bits and no saturation.
- **Default adder.** The hybrid CI-CSKA is the default because it is the
  adder the design proposes. The plain CI-CSKA and the conventional one are
  kept selectable.
- **No separate block-enable logic.** The operand and product registers load
  only for valid data, so idle cycles do not toggle the multiplier.
- **Stage sizes** of the hybrid adder and the width of its nucleus.
- **The precise CI stage equations.** The published structure names
  concatenation and incrementation but does not spell them out.
- **The prediction rule** (nucleus all-propagate) and the way it is used
  (a one-cycle stall of the whole pipeline).
- **Interface.** The three-stage pipeline, the valid-ready handshake, the
  `out_valid` pulse, and the synchronous reset.
- **Unsigned operands.**
- **Multiplier style.** One description of the source design mentions a Dadda
  tree for the partial products, and a Booth-encoded Wallace-tree MAC appears
  as an illustration of the accumulator. Both are left out: the design is
  otherwise consistently an array multiplier feeding a carry-skip adder.

## Verification

Every block has a self-checking testbench. Each compares the block's outputs
with values computed independently in the testbench and ends with a
`TB_RESULT checks=… failures=…` line:

| testbench | what it checks |
|---|---|
| `tb_rca` | 4-bit adder exhaustively, 16-bit adder at random |
| `tb_array_multiplier` | 4x4 exhaustively, 16x16 with corner and random operands |
| `tb_cska_conv` | 16- and 32-bit adders, including operands that make blocks propagate; counts carries that actually used a skip |
| `tb_bk_ppa` | 8-bit and 6-bit prefix adders exhaustively: sum, group generate, group propagate |
| `tb_cska_hybrid` | 16- and 32-bit hybrid configurations and the 16-bit plain CI-CSKA: sum, carry and the prediction, including operands aimed at the nucleus |
| `tb_accumulator` | random reset / load / hold sequences against a model |
| `tb_mac_unit` | end to end, described below |
| `tb_mac_full` | one 64-tap FIR output sample at the default configuration, described below |

`tb_mac_unit` runs the hybrid, the plain CI and the conventional MAC side by
side on the same stream of about 6000 operand pairs. It checks every result and its latency, and
it requires each of these to occur at least once:

- two-cycle additions and the back-pressure they cause;
- accumulator overflows;
- idle input cycles;
- resets in the middle of an accumulation.

`tb_mac_full` runs the top at its default parameters on one 64-tap FIR output
sample. It checks the final sum and the number of cycles: 63 + 2 edges from the
first to the last result, plus one per two-cycle addition.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_mac_unit rtl/mac_pkg.sv tb/tb_mac_unit.sv
./obj_dir/Vtb_mac_unit
```

Every testbench finishes in well under a second.
