# Flexible two-stage dual-rail 32-bit ALU

A clocked ALU must always allow for its slowest operation, usually the
multiplier. This ALU has no clock. Each operation ends as soon as its own
logic has finished. The ALU has two stages, modelled on multiply-accumulate:

```
   Source1 ─┐                          ┌──────────── bypass ───────────┐
            ├─► first ALU ─► Demux ────┤                               ├─► Merge ─► Result ─► done
   Source2 ─┘   (FnCode1)  (bypass_or_not)└─► second ALU (FnCode2) ────┘
                                               ▲
   Source3 ────────────────────────────────────┘
```

- **Common instruction.** The first ALU computes `Source1 op1 Source2`. With
  `FnCode2 = 0000` its result skips the second ALU and becomes the Result.
- **Compound instruction.** Here the first ALU's result is passed to the second
  ALU, which computes `(Source1 op1 Source2) op2 Source3`. Examples are
  multiply-add `213 + 216*144`, "shift then add" and "add then add".

Each ALU contains eight function blocks. A demultiplexer sends the operands
to the one block that the code selects. The other blocks receive nothing and
do nothing. An operation therefore costs only the delay of the blocks it
actually passes through. A bypassed common AND passes through only a few C-element levels (decode, demux, DIMS gate, merge). A
multiply-add costs the multiplier plus the adder.

All of this is written in dual-rail, delay-insensitive logic built from Muller
C-elements. It is synthesizable SystemVerilog with no clock anywhere in the
ALU.

## Dual-rail encoding and the 4-phase handshake

Each bit is carried on two wires, a true rail and a false rail:

| (t, f) | meaning        |
|--------|----------------|
| (0, 0) | empty (spacer) |
| (0, 1) | valid 0        |
| (1, 0) | valid 1        |
| (1, 1) | never occurs   |

In the RTL a word is a pair of vectors. `dr_pkg::dr_word_t` is
`{t[31:0], f[31:0]}`. Functions there encode and test words.

One operation of `dr_flex_alu` goes through four phases:

1. The environment drives all inputs valid: `src1..3`, `fn1`, `fn2`, `mode1`
   and `mode2`. The arrival order does not matter.
2. The `done` output rises once every bit of `result` is valid. Read `result`
   at this point.
3. The environment drives all inputs empty, with every rail at 0.
4. `done` falls once every bit of `result` is empty again. The next operation
   may then start.

Every gate waits for all the inputs it needs. A result bit can therefore never
be valid early by accident. Testbenches check this by holding back one input
(for example FnCode2) and confirming that `result` stays empty.

All inputs must be empty at power-up. No part of the ALU has a reset. A
C-element with all inputs at 0 settles to 0, so an empty input clears the
whole ALU.

## The C-element and how it is modelled

Everything is built from the Muller C-element (`c_element`). Its output rises
when all of its inputs are 1. It falls when all are 0. Otherwise it keeps its
value. In silicon this is a transistor stack with a keeper. Here it is a level
latch that is enabled while all inputs agree:

```systemverilog
always_latch
  if (&col)       st = 1'b1;
  else if (~|col) st = 1'b0;
```

The latches are therefore intended. Synthesis reports about 12,400 latch bits
for the full ALU, and lint tools list them as latches. They are the circuit.
The one place with a real combinational loop is the stand-alone pipeline
(below). There each stage's acknowledge feeds back into the stage before it.
Verilator reports this as `UNOPTFLAT` and simulates it correctly.

The RTL is zero-delay. A simulator settles the whole ALU within one time step.
The data-dependent speed of the real circuit is therefore not visible in
simulation (see *Limits*).

## DIMS gates: how logic is built

Every dual-rail function uses Delay-Insensitive Minterm Synthesis:

- One C-element per input minterm. Exactly one of them fires when the inputs
  become valid.
- OR gates collect the minterms onto the true and false output rails.

The building blocks are:

- `dims_gate`: 2-input AND/OR/XOR, with 4 C-elements per bit.
- `dims_full_adder`: 8 three-input C-elements. The sum rails take the
  even-parity or odd-parity minterms. The carry rails take the majority
  minterms.
- `dims_half_adder`: the full adder with its carry-in fixed at 0, simplified.

Constants need special care. A constant "valid 0" has its false rail stuck at
1, and a C-element fed by it can never return to empty. Wherever a constant 0
appears (multiplier edges, shifter fill bits), the logic is therefore
simplified by hand. This gives `dims_half_adder` and `dr_zmux`.

## Routing: Demux, Merge and the bypass

- **FnCode decoder** (`dr_fn_decode`). Sixteen 4-input C-elements detect the
  code's minterm. When the code is valid, exactly one line `sel[v]` is high.
  The decoder also produces a dual-rail `bypass_or_not`:
  - `bypass_or_not = FnCode2[3] | FnCode2[2] | FnCode2[1] | FnCode2[0]`;
  - its false rail is minterm 0000;
  - its true rail is any other minterm.
- **Demux branch** (`dr_demux`). This is a C-element per rail, joined with one
  select wire. A branch whose select stays low stays empty.
- **Merge** (`dr_merge`). This is a plain OR. It is correct because at most
  one branch carries data.
- **Demux-Demux** (in `dr_flex_alu`). The first ALU's merged result goes
  through two demux branches:
  - steered by `bypass_or_not.t` into the second ALU (operand a);
  - steered by `bypass_or_not.f` onto the bypass path.

  The final Merge ORs the second ALU's output with the bypass path.
- **Completion** (`dr_completion`). Each bit's rails are ORed into an
  acknowledge. An AND over the acknowledges gives "all valid" and an OR gives
  "not yet all empty". A C-element joins the two to form `done`.

## Operations (FnCode)

| FnCode | block      | result                                         |
|--------|------------|------------------------------------------------|
| 0000   | (bypass)   | only meaningful as FnCode2                     |
| 0001   | Add/Sub    | `a + b`, or `a - b` when mode[0] = 1           |
| 0010   | Multiply   | `a[15:0] * b[15:0]`, unsigned, 32-bit product  |
| 0011   | AND        | `a & b`                                        |
| 0100   | OR         | `a \| b`                                       |
| 0101   | NOT        | `~a`                                           |
| 0110   | XOR        | `a ^ b`                                        |
| 0111   | Shift Left | by `b[4:0]`; mode[0] arithmetic, mode[1] rotate |
| 1000   | Shift Right| by `b[4:0]`; mode[0] arithmetic, mode[1] rotate |

In the first ALU, `a = Source1` and `b = Source2`. In the second ALU, `a` is
the first result and `b = Source3`.

**The `mode` inputs are this design's own addition.** The 4-bit FnCode of the
original design names "Add/Sub", "Shift Left" and "Shift Right". It does not
say how subtraction, arithmetic shifts or rotates are chosen. This design
therefore gives each ALU a dual-rail 2-bit `mode`:

- bit 0 selects subtract, or arithmetic shift;
- bit 1 selects rotate.

Subtraction is computed as `a + ~b + 1`:

- `b` is XORed with mode[0] through DIMS XOR gates;
- mode[0] is also the adder's carry-in.

Codes 1001–1111 select no block. The handshake then never completes, so do not
use them. An arithmetic left shift keeps the sign bit: `a7 a3 a2 a1 a0 0 0 0`
for a shift of 3 on 8 bits. Setting rotate and arithmetic together is not a
defined operation.

## Function blocks

### Carry-lookahead adder (`dr_cla_adder`, `dr_cla_cmod`, `dr_cla_dmod`)

**C modules.** There is one per bit. Each turns `A_i, B_i` into a one-hot code
`(k, g, p)`:

- kill: `A0B0`;
- generate: `A1B1`;
- propagate: `A0B1 + A1B0`.

When its carry arrives, the C module forms the sum from the full minterm
equations.

**D modules.** These form a binary tree. Each one merges an upper group `[i:j]`
and a lower group `[j-1:k]`:

```
P(i,k) = P(i,j)P(j-1,k)        K(i,k) = K(i,j) + P(i,j)K(j-1,k)
G(i,k) = G(i,j) + P(i,j)G(j-1,k)
C_j^0  = K(j-1,k) + P(j-1,k)C_k^0    C_j^1 = G(j-1,k) + P(j-1,k)C_k^1
```

The tree works in both directions:

- Going up, it builds the codes of groups of 2, 4, 8, … bits.
- Going down, it hands each group's carry-in to its upper half. Every carry
  `C_1 … C_31` is made by exactly one D module, and a last D module produces
  `C_32`.

Products are C-elements. A group that kills or generates therefore produces
its carry without waiting for the carry-in. This is the reason the adder is
fast on average.

### Array multiplier (`dr_array_mult`)

The multiplier is 16 × 16, right to left:

- **Partial products.** Row `j` is the multiplicand ANDed (DIMS) with
  multiplier bit `j`.
- **Adder rows.** Row `j` adds partial-product row `j` to the previous row's
  sum shifted right by one. The previous row's carry-out enters at the top.
  Carries ripple leftwards inside the row.
- **Product bits.** The low sum bit of each row is one product bit. The last
  row's sums and carry-out give bits 15–31.
- **Edges.** Positions with only two operands use half adders.

There is no separate final adder: the last ripple row does that job.

### Shifters (`dr_shifter`, `dr_mux`, `dr_zmux`)

These are logarithmic shifters with 5 stages that move 16, 8, 4, 2 and 1
places. Every bit of a stage is a dual-rail 2:1 mux (`dr_mux`). Each mux has
two C-elements per rail, gated by the select's true and false rails, and an
OR.

`LEFT = 0` is the right shifter/rotator:

- A fill bit `s` is 0, or the sign bit for an arithmetic shift.
- In the stage controlled by `b[k]`, the `2^k` bits entering from the top come
  from extra muxes. These choose between `s` and the stage's `2^k` low bits,
  which gives the rotate.

`LEFT = 1` is the mirror image, plus a last mux that restores the sign bit
for an arithmetic left shift. Each ALU has one left and one right instance.

## Stand-alone 4-phase pipeline (`dr_pipeline`, `dr_latch_stage`)

The top also holds a separate dual-rail Muller pipeline that is not connected
to the ALU. By default it has 3 stages and is 3 bits wide, with its own
`pipe_*` ports. It shows the handshake style in its plain form:

- Each stage latches every rail through a C-element, joined with the inverted
  acknowledge of the next stage.
- Each stage sends back the completion of its own contents.

A full pipeline holds at most one word per two stages. This design adds a
`rst` input, which clears the stages by holding both inputs of every
C-element at 0.

## Simulating

Each testbench in `tb/` checks itself. Each one ends with
`TB_RESULT checks=N failures=M`. Build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dr_pkg.sv tb/tb_ref_pkg.sv tb/tb_dr_flex_alu.sv --top-module tb_dr_flex_alu
./obj_dir/Vtb_dr_flex_alu
```

`tb_dr_flex_alu` runs the ALU at full size. It builds in about 30 s and runs
in about 3 s. Its checks are:

- **Directed cases.** The multiply-accumulate example and one pair from each
  operation class.
- **Random operations.** 3,000 random common and compound operations, compared
  with an integer model (`tb_ref_pkg`).
- **Early result.** `result` must stay empty until the last input arrives.
- **Idle paths.** The second ALU must stay idle on a bypass, and the
  multiplier must stay idle unless it is selected.
- **Coverage.** Each FnCode must be used in both ALUs. Bypass, compound
  operations, subtract, arithmetic shift and rotate must each occur.
- **Pipeline.** It also streams words through the pipeline, with the receiver
  stalling at times.

Each block also has its own testbench: `tb_<module>.sv`. `tb_flex_alu_pairs`
runs a set of operation pairs, each in both orders, with small and random
operands. These are the pairs the design targets:

- add/sub+add/sub, add/sub+mul;
- add/sub+shift, add/sub+and, add/sub+or;
- and+and, and+or, or+or;
- shifts combined with and/or;
- shift+shift.

## Limits and departures

- **Delays.** The RTL is zero-delay. The delays measured for the original
  gate-level design cannot be reproduced from RTL. Examples are about 21 ns
  for the multiply-add example and about 4 ns for AND+AND, against 37.75 ns
  for a clocked version. This code checks function and handshake order, not
  speed.
- **Mode bits.** `mode` (subtract / arithmetic / rotate) is this design's own
  choice. So are the operand order in the second ALU (first result = `a`) and
  using the low 16 bits of the operands for multiplication.
- **Completion detection.** The multiplier and the adder each have a
  completion detector with a `done` output. Inside the ALU these outputs are
  left unconnected, because the ALU detects completion once, on its Result.
- **Full-adder carry.** The carry rails use full minterms, so the carry waits
  for all three inputs. The printed equations use two-literal products instead.
  The logic function is identical.
- **Reserved codes.** Codes 1001–1111 and FnCode1 = 0000 hang the handshake.
- **No flags.** No carry-out or overflow flag is brought out.
- **Delay insensitivity.** The RTL keeps the dual-rail and C-element structure.
  Whether the circuit is delay-insensitive after synthesis, for example whether
  isochronic forks hold, depends on the gate-level implementation. A generic
  synthesis flow may restructure the OR trees and the latches.
