# 8-bit multi-output domino carry look-ahead adder with split even/odd carry chains

A Manchester carry chain in domino CMOS is fast, regular and small. But a
chain can be only about four stages long before its series pass transistors
make it slow. So a wide adder is usually built from 4-bit chains placed one
after another.

This design builds an 8-bit adder block from two 4-stage chains that work
side by side instead. One chain computes the carries into the even bit
positions. The other computes the carries into the odd positions. Neither
chain waits for the other, so the 8-bit block is no slower than one 4-bit
chain.

The RTL models the circuit at the logic level. Each domino gate becomes the
Boolean function it evaluates, gated by the domino clock:

- while `clk` is low (precharge), every output reads 0;
- while `clk` is high (evaluate), the outputs give the result.

There are no flip-flops.

## Why the carries split into even and odd chains

Per bit there are three signals:

| signal | meaning  | formula          |
|--------|----------|------------------|
| `g_i`  | generate | `a_i & b_i`      |
| `p_i`  | half-sum | `a_i ^ b_i`      |
| `t_i`  | transmit | `a_i \| b_i`     |

The true carry obeys `c_i = g_i | t_i c_(i-1)`. Each carry needs the one just
below it, so true carries cannot split into two chains.

The chains work instead with Ling-style pseudo-carries:

    h_i = g_i | c_(i-1)        and so       c_i = t_i & h_i

(This holds because `g_i` implies `t_i`.) Expanding `c_(i-1)` once gives

    h_i = (g_i | g_(i-1))  |  (t_(i-1) & t_(i-2)) & h_(i-2)
        =      gg_i        |          pp_i        & h_(i-2)

so `h_i` depends only on `h_(i-2)`, two positions down. The even
pseudo-carries `h0, h2, h4, h6` therefore form one Manchester chain, and the
odd ones `h1, h3, h5, h7` form another. Each chain is driven by two-bit
"pair" terms:

- `gg_i`, the pair generate;
- `pp_i`, the pair transmit.

A chain node is pulled down by its own `gg`, or by the node below it through
a pass transistor gated by `pp`.

The carry-in `c_-1` enters at the foot of both chains:

| chain | foot of the chain                                                          |
|-------|----------------------------------------------------------------------------|
| odd   | a carry-in transistor: `h1 = (g1 \| g0) \| t0 & c_-1`, so `pp_1 = t_0`     |
| even  | no carry-in transistor; the carry-in is ORed into its first generate: `h0 = gg_0 = g0 \| c_-1` |

Finally:

    c_i  = t_i & h_i
    s_0  = p_0 ^ c_-1
    s_i  = p_i ^ c_(i-1)
    cout = c_7

## Datapath and files

| stage | module                  | work                                             |
|-------|-------------------------|--------------------------------------------------|
| 1     | `domino_generate`       | `g_i = a_i & b_i`, one per bit                    |
| 1     | `domino_propagate_xor`  | `p_i = a_i ^ b_i`, one per bit (sum only)         |
| 1     | `domino_propagate_or`   | `t_i = a_i \| b_i`, one per bit (chains, carries) |
| 2     | `ling_pair_terms`       | `gg_i`, `pp_i`, carry-in folded in at bits 0 and 1 |
| 3     | `even_carry_chain`      | `h0, h2, h4, h6`: 4 nodes, 3 pass stages          |
| 3     | `odd_carry_chain`       | `h1, h3, h5, h7`: carry-in foot, 4 pass stages    |
| 4     | `mcc_sum`               | `c_i = t_i h_i`, sum bits, carry-out              |
| top   | `mcc8_adder`            | wires the stages and splits even and odd terms    |

`mcc_pkg` holds the two shared sizes: `CHAIN_LEN = 4` and
`ADDER_WIDTH = 8`.

Ports of `mcc8_adder`:

| port   | dir | width   | meaning                                            |
|--------|-----|---------|----------------------------------------------------|
| `clk`  | in  | 1       | domino phase: 0 = precharge, 1 = evaluate          |
| `a`    | in  | `WIDTH` | operand A                                          |
| `b`    | in  | `WIDTH` | operand B                                          |
| `cin`  | in  | 1       | carry-in `c_-1`                                    |
| `s`    | out | `WIDTH` | sum; 0 in precharge                                |
| `c`    | out | `WIDTH` | every carry `c_0..c_7`, as a multi-output gate gives them; 0 in precharge |
| `cout` | out | 1       | carry-out `c_7`; 0 in precharge                    |

Timing rules:

- Apply the operands while `clk` is low.
- Read the result before `clk` falls again.
- The result comes in the same cycle; there is no pipeline.

`WIDTH` defaults to 8. Any even value of 4 or more elaborates, with chains
of `WIDTH/2` stages. However, only the 8-bit block with 4-stage chains is
the design. Longer chains lose the length limit that is the reason for the
structure.

## The domino cells

Each bit-level gate is a footed domino gate with these parts:

- a clocked pMOS that precharges the dynamic node;
- an nMOS pull-down network with a clocked foot transistor;
- a keeper pMOS, driven by an inverter from the node;
- an output inverter.

The keeper only holds the node against leakage, so it has no logic
counterpart. In the reference circuit, all transistors are 1.4 µm / 0.35 µm.
Sizes are not modelled.

The XOR cell's pull-down has two branches: one on the true inputs and one on
the complemented inputs. The complements are formed inside the cell. As
labelled, the transistor drawing of that cell would discharge the node when
the inputs are equal, which gives XNOR at the output. The cell's stated
function is XOR, and the sum equation needs XOR, so XOR is what is built
here.

## Where this RTL makes its own choices

Reading of the chain equations. The chain equations this design follows
are written with the plain bit names: for example `h2 = g2 + p2 g0` and
`h4 = g4 + p4 g2 + p4 p2 g0`. Read literally, with bit-level `g` and `p`,
they skip the odd bits and do not add. The structure is stated to be
Ling-like and to separate the even carries from the odd ones. So the `g`
and `p` on the chains are taken to be the pair terms `gg`/`pp` above. With
that reading the adder is exact. The exhaustive tests confirm it.

Other choices:

- **Carry-in in the even chain.** The carry-in is merged into the even
  chain's first generate, because that chain has no carry-in transistor.
- **Last odd-chain output.** The last output of the odd chain is labelled as
  the carry-out. Here the chain delivers `h7`, and `cout = t7 & h7` is formed
  in `mcc_sum`.
- **Clock gating.** The pair terms and the sum stage are also gated by
  `clk`, so that every output of the adder is 0 in precharge. The circuit of
  these two stages is not given.
- **No registers.** None are given for the operands or the result.

## What is not here

- The conventional 4-bit Manchester chain. It is only the baseline that the
  split design is compared against.
- Electrical behaviour: delay, charge sharing, keeper strength. The
  reported figures are an evaluate delay of 37.47 ps below the 49.75 ps of
  the 4-bit chain, in a 50 nm process at 50 MHz. A logic model cannot show
  them.
- Wider adders (16 or 32 bits) built from several 8-bit blocks. They are
  only mentioned as further work.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| testbench                  | what it checks |
|----------------------------|----------------|
| leaf-cell testbenches      | every input combination, in both clock phases |
| `even_carry_chain_tb`      | every input combination, against the sum-of-products form of each pseudo-carry |
| `odd_carry_chain_tb`       | every input combination, against the sum-of-products form of each pseudo-carry |
| `ling_pair_terms_tb`       | corner cases and random vectors |
| `mcc_sum_tb`               | all 2^17 operand and carry-in combinations, against integer addition |
| `mcc8_adder_tb`            | the whole adder at its default size (see below) |

`mcc8_adder_tb` runs a free-running clock:

- On each falling edge it applies one of all 2^17 operand and carry-in
  combinations, and checks that all outputs read 0.
- On the next rising edge it checks `s`, `cout` and all eight carries
  against integer addition and a ripple reference.

It also counts the adder's mechanisms and fails if any never occurs:

- precharge;
- the carry-in running through the whole odd chain;
- a bit-0 generate running through the whole even chain;
- both chains carrying at once;
- carry-out.

To run one testbench with Verilator:

    verilator --binary --timing --top-module mcc8_adder_tb \
        -Irtl -Itb rtl/mcc_pkg.sv tb/mcc8_adder_tb.sv -y rtl -y tb +libext+.sv
    ./obj_dir/Vmcc8_adder_tb

Pass `rtl/mcc_pkg.sv` first, because the modules take their default sizes
from it. Every testbench finishes in well under a second.
