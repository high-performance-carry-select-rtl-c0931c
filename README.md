# Carry-select adder with a single RCA per block and fast all-one finding

A carry-select adder cuts the long carry chain of a ripple-carry adder (RCA)
into blocks. Every block works out its sum before the carry from the block
below is known, and that carry then only has to pick the right result. The
classic form pays for this with two RCAs per block, one assuming a carry in of
0 and one assuming 1.

This design keeps one RCA per block. The second result, for a carry in of 1, is
just the first one plus one, and adding one to a binary number inverts every
bit up to and including its lowest 0. So each sum bit is a 2:1 choice between
the RCA's bit and its inverse. An *all-one finding* chain decides, for each
bit, whether every bit below it is 1. The same chain gives the block's carry
out without waiting for the sum of the top bit: it uses that bit's `a ^ b`
instead. As a result, the only path from a block's carry in to its carry out
is one multiplexer.

The RTL is a 64-bit adder of nine blocks, 4, 4, 5, 6, 7, 8, 9, 10 and 11 bits
wide from the least significant end. It is purely combinational.

## Structure

```
carry_select_adder            64-bit adder, no carry in
├─ ripple_carry_adder (W=4)   block 1: plain RCA, HA at bit 0
└─ addone_csa_block (W=4..11) blocks 2..9
   ├─ ripple_carry_adder      S0 = a + b with carry in 0
   │  ├─ half_adder           bit 0
   │  └─ full_adder           bits 1..W-1, also give a^b and a&b
   ├─ all_one_finder          P_1 .. P_W
   └─ mux2 × (W+2)            W sum selects, two carry selects
csa_pkg                       default width and block lengths
```

The carry of each block, `bc[i]`, drives the carry in of block `i+1`. All
RCAs run in parallel from the operands. Block lengths grow towards the top
because a higher block's RCA has more time: the carry from below arrives
later.

## The add-one block (`addone_csa_block`)

Take a W-bit block with operand slices `a`, `b` and carry in `cin`. The RCA
gives `S0`, its carries `C_i` (the carry out of bit i), and per bit
`p_i = a_i ^ b_i` and `g_i = a_i & b_i`.

**All-one finding.** `P_k` (for k = 1..W) is 0 exactly when the bits of `S0`
below bit k are all 1:

```
P_k = ~(S0_0 & ... & S0_{k-1})          k = 1 .. W-1
P_W = ~(S0_0 & ... & S0_{W-2} & p_{W-1})
```

The circuit this models is a series chain of pass transistors from ground,
one per bit and each gated by a sum bit, with a pull-up on every node. In RTL
each stage is `node_k = ~gate_{k-1} | node_{k-1}`. The port `p[k-1]` carries
`P_k`.

The last stage uses `p_{W-1}` instead of `S0_{W-1}`, and the two agree
whenever they matter. If `S0_0 .. S0_{W-2}` are all 1, then every lower bit
has `a != b`, so no lower bit generates a carry. The carry into the top bit is
then 0, and `S0_{W-1} = p_{W-1}`. So `P_W = 0` still means "all W bits of S0
are 1", but it does not wait for the top carry.

**Sum selection.**

```
S_0 = cin   ? ~S0_0 : S0_0
S_k = Sel_k ? ~S0_k : S0_k      Sel_k = cin & ~P_k
```

**Carry out.** For a carry in of 0 the block carries `C_{W-1}`. For a carry
in of 1 it carries `cout1`:

```
cout1 = C_{W-2} ? (a_{W-1} | b_{W-1})
                : ~(P_W & ~(a_{W-1} & b_{W-1}))
cout  = cin ? cout1 : C_{W-1}
```

Here is why this is right:

- If the carry into the top bit is 1, the block carries whenever the top bit
  has a 1 in either operand. This is the same as `C_{W-1}`, whatever `cin` is.
- If the carry into the top bit is 0, adding one makes the block carry in two
  cases: the top bit generates (`a & b`), or the whole of `S0` is ones
  (`P_W = 0`).

The block asserts the fact this selection relies on: a carry into the top bit
rules out an all-one `S0` (`C_{W-2} = 1` implies `P_W = 1`).

The design is specified for a 4-bit block. For W bits, the RTL maps its
top bit 3 to bit W-1, the carry into bit 3 (`C_2`) to `C_{W-2}`, and `P_4`
to `P_W`. That generalisation is this implementation's own reading. The
tests cover block widths from 2 to 11 bits.

## Cells

- `full_adder`:
  - The carry is a two-level NAND network, `~(~(a&b) & ~((a^b)&ci))`.
  - The sum is two XORs.
  - The cell also brings out `p = a^b` and `g = a&b`, so the add-one logic
    reuses the top FA's own XOR and AND.
- `half_adder`: `s = a ^ b`, `co = a & b`.
- `mux2`: `y = sel ? d1 : d0`. It stands for a transmission-gate multiplexer,
  chosen in the circuit for its small data-to-output delay. Only its function
  is modelled here.

## What is and is not modelled

- The logic function is exact: every block and the whole adder are checked
  against integer addition.
- Transistor-level choices are not modelled. These are the pass-transistor
  chain, the buffers inside it, and the transmission-gate multiplexers. Area
  and delay figures are not modelled either. These choices are what make the
  design small and fast in silicon, and synthesis maps this RTL onto ordinary
  cells, so those figures will not carry over. For reference, the circuit-level
  results quoted for this design are:
  - Transistor count per add-one block: `44n - 8 + 4·floor((n-1)/2)`.
  - 2764 transistors for the 64-bit adder.
  - A critical path of 21.5 two-input-NAND delays.
- The adder has no carry in: bit 0 of block 1 is a half adder. To add one,
  replace block 1's half adder with a full adder.
- There is no clock or reset. Register the inputs and outputs outside if the
  adder is to sit in a pipeline.

## Parameters

`carry_select_adder`:

| parameter    | default                        | meaning                              |
|--------------|--------------------------------|--------------------------------------|
| `WIDTH`      | 64                             | operand width                        |
| `NUM_BLOCKS` | 9                              | number of blocks                     |
| `BLOCK_W`    | `'{4,4,5,6,7,8,9,10,11}`       | block lengths, least significant first |

`BLOCK_W` must add up to `WIDTH`; elaboration stops with an error otherwise.
Every add-one block needs at least 2 bits. The leaf modules take a width `W`
(default 4).

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

| testbench                | what it covers |
|--------------------------|----------------|
| `tb_half_adder`, `tb_full_adder`, `tb_mux2` | exhaustive |
| `tb_ripple_carry_adder`  | 4 bits exhaustive; 11 bits random, with long propagate runs |
| `tb_all_one_finder`      | 4 and 11 bits exhaustive |
| `tb_addone_csa_block`    | 2 and 4 bits exhaustive; 11 bits random and directed |
| `tb_carry_select_adder`  | full 64-bit adder at default parameters, 200,014 additions (see below) |

`tb_addone_csa_block` counts each carry-out case: no carry in, carry into the
top bit, top-bit generate, all-one, and plain add-one. It fails if any case is
never seen.

`tb_carry_select_adder` builds its operands block by block: random, fully
propagating, nearly propagating, or all ones. For every add-one block it
counts each selection case and fails if one never happened. It also counts the
additions whose carry ripples from block 1 through all eight add-one blocks.

Run the package first, then the RTL, then a testbench:

```
verilator --binary --timing --assert -Mdir obj \
    rtl/csa_pkg.sv rtl/half_adder.sv rtl/full_adder.sv rtl/mux2.sv \
    rtl/ripple_carry_adder.sv rtl/all_one_finder.sv rtl/addone_csa_block.sv \
    rtl/carry_select_adder.sv tb/tb_carry_select_adder.sv \
    --top-module tb_carry_select_adder
./obj/Vtb_carry_select_adder
```

The end-to-end test runs in a few seconds. Lint with the same file list plus
`--lint-only -Wall`. The only remaining warnings are the unused
propagate/generate outputs of block 1's RCA.
