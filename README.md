# Four 4-bit adders built from reversible logic gates

A reversible gate has as many outputs as inputs, and its outputs determine
its inputs uniquely. Such a gate destroys no information, so in principle it
need not dissipate the kT·ln2 of heat per erased bit that Landauer's
principle charges an ordinary AND or OR gate. This RTL describes four 4-bit
adders composed entirely of reversible gates:

| adder | gates | idea |
|---|---|---|
| adder/subtractor | 4 Feynman + 4 SSS | Feynman gates invert `b` under a mode line, an SSS ripple adder adds |
| carry skip adder | 4 SSS + 4 Fredkin | ripple adder plus a Fredkin AND tree and a Fredkin skip multiplexer |
| carry select adder | 8 SSS + 5 Fredkin | two ripple adders (carry in 0 and 1), Fredkin multiplexers choose |
| "carry save" adder | 5 Peres + 3 SSS | Peres gates split each bit into propagate/generate, SSS gates combine carries |

The central part is the four-line **SSS gate**. With one input tied to 0 it
is a complete full adder in a single gate, and it also outputs the propagate
bit `a xor b`, which the carry skip adder uses.

Everything is combinational. There is no clock, reset or handshake: the
outputs are valid one propagation delay after the inputs change. The RTL
describes the logic function of each gate. It does not model the physical
reversibility (the garbage outputs are simply left unconnected), and
synthesis will map it onto ordinary cells.

## The gates

All four gates pass input A straight through on output P. The remaining
outputs are:

| gate | inputs | outputs | typical use |
|---|---|---|---|
| Feynman (`feynman_gate`) | A, B | Q = A⊕B | controlled inverter, copy |
| Peres (`peres_gate`) | A, B, C | Q = A⊕B, R = AB⊕C | with C = 0: half adder (Q = propagate, R = generate) |
| Fredkin (`fredkin_gate`) | A, B, C | Q = A'B⊕AC, R = A'C⊕AB | controlled swap. A = 0 gives Q = B, R = C; A = 1 gives Q = C, R = B. Used as a 2:1 mux on R (R = A ? B : C), or with C = 0 as an AND gate (R = AB) |
| SSS (`sss_gate`) | A, B, C, D | Q = A⊕B⊕D, R = A⊕B, S = (A⊕B)D ⊕ AB ⊕ C | with C = 0: full adder (Q = sum, S = carry, R = propagate) |

Each of the four mappings is a bijection, and the gate testbenches check this
as well as the equations. In the SSS gate, S with C = 0 is the majority of
A, B and D. A full adder is therefore symmetric in its three inputs, and
this is what makes the carry-save wiring below work.

## SSS ripple adder (`sss_ripple_adder`)

This is a chain of `WIDTH` SSS gates (default 4). Stage *i* has A = `a[i]`,
B = `b[i]`, C = 0, and D = the S output of stage *i*−1 (`cin` for stage 0).
The module brings out the sum (Q), the per-bit propagate (R), every stage
carry (S) and the final carry. Three of the four adders contain it.

## Adder/subtractor (`rev_add_sub`)

Each bit of `b` passes through a Feynman gate whose control input is the
mode line `f`. This gives `b xor f`, so `b` is inverted in subtract mode. The
result feeds the SSS ripple adder together with `a`. The adder's carry in is
also `f`. Together these give `a + b` for `f = 0` and `a + ~b + 1 = a − b`
(two's complement) for `f = 1`. `cout` is the raw carry. In subtract mode it
is 1 when no borrow occurred (`a >= b` unsigned). No overflow flag is
produced.

## Carry skip adder (`rev_carry_skip_adder`)

The ripple adder computes the sum. Its R outputs `p0..p3` feed three Fredkin
gates used as AND gates (C = 0), arranged as a two-level tree:
F2 = p0·p1, F1 = p2·p3, F3 = F1·F2. The output of F3 is the block propagate
P, brought out as `block_prop`. A fourth Fredkin gate F4 is the skip
multiplexer, with P on its control input:

    cout = P ? cin : (ripple carry of bit 3)

When every bit propagates, the carry in goes around the block instead of
rippling through it. `cout` is meant to be the carry in of a following
4-bit block.

In this design, `cin` goes to F4's B input and the ripple carry to its C
input, so the carry appears on R. Wiring the two the other way round would
put the function on the Q output instead. `cin` is a port. In the original
circuit it is tied to 0, which makes the skip path pointless for a single
block.

## Carry select adder (`rev_carry_select_adder`)

Two SSS ripple adders add the same operands at the same time. One has its
carry in tied to 0, the other tied to 1. Five Fredkin gates act as 2:1
multiplexers controlled by the real `cin`. Four of them choose the sum bits
and the fifth chooses the carry out. The select signal is not fanned out.
Each multiplexer passes it on to the next through its P output, forming a
chain of four hand-offs. Every multiplexer has the carry-in-1 result on B
and the carry-in-0 result on C, so R = `cin ? result1 : result0`. The
multiplexers choose between the two adders' **sum** outputs (Q). The R
outputs of the SSS gates lack the carry and could not be used here.

## The "carry save" adder (`rev_carry_save_adder`)

Despite its name, this is a two-operand 4-bit adder with a carry in. There is
no third operand, and carries are not saved in a separate vector. The carry
chain is split into propagate and generate terms:

```
S1 (a0, b0, 0, cin)          -> sum0, c1
P1..P3 (a_i, b_i, 0)          -> p_i = a_i^b_i (Q), g_i = a_i&b_i (R)
P4 (c1, p1, 0)                -> sum1 (Q), c1&p1 (R)
S2 (g1, c1&p1, 0, p2)         -> sum2 (Q), c2&p2 (S)
S3 (g2, c2&p2, 0, p3)         -> sum3 (Q), c3&p3 (S)
P5 (c3&p3, g3, 0)             -> cout (Q)
```

This works because the generate and propagate bits of one position are
never both 1. So g1 and c1·p1 are mutually exclusive, and the carry c2 =
g1 + c1·p1 equals their XOR. The SSS gate S2 then computes
sum2 = c2 ⊕ p2 as its parity output and c2·p2 as its majority output. The
same step repeats for bit 3, and P5 finally computes c4 = g3 ⊕ c3·p3. The
assignment of signals to the A, B and D inputs of S2 and S3 is this design's
choice. With C = 0 an SSS gate is symmetric in those three inputs, so the
choice does not matter.

## Top level (`rev_adders_top`)

The four adders share nothing and stand side by side. Each has its own ports,
prefixed `as_`, `skip_`, `sel_` and `save_`. The shared width
`ADDER_WIDTH = 4` and the operand type `operand_t` live in `rev_pkg`. The
ripple adder and the adder/subtractor take the width as a `WIDTH`
parameter. The carry skip, carry select and carry save adders are wired gate
by gate for 4 bits.

## Where this RTL interprets or departs from the original circuits

- The published truth tables for the Peres, Fredkin and SSS gates disagree in
  several rows with the gate equations. The equations are used here; they
  also agree with the way the gates are used in the adders.
- Adder/subtractor: the carry into bit 0 is the mode line. This is the only
  way subtraction comes out right, and the schematic shows a connection from
  the mode line to the first carry input.
- Carry skip: the data inputs of the skip multiplexer are chosen so that it
  computes `P ? cin : ripple carry`. The carry in is a port rather than a
  constant 0.
- Carry select: one ripple adder uses carry in 0 and the other carry in 1.
  The multiplexers choose between sum (Q) outputs. The original circuit calls
  for "modified" Fredkin gates with lower quantum cost but does not define
  them, so plain Fredkin gates are used.
- "Carry save" adder: built as the two-operand Peres/SSS network above. It is
  not a three-operand carry save tree.
- The area, delay and power figures reported for 45 nm and 180 nm come from a
  custom transistor-level flow. Nothing in this RTL reproduces them. The 10T
  CMOS full adder used as the conventional baseline is not included.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It
applies inputs, compares every output with integer arithmetic or with a
property (for example, a Fredkin gate conserves the number of ones), and
ends by printing `TB_RESULT checks=N failures=M`. All gates and all 4-bit
adders are tested exhaustively over every operand pair and carry or mode
bit. The ripple adder is also tested at 8 bits with random operands.
`tb_rev_adders_top` runs the whole top level: first exhaustively, then with
4000 independent random vectors per adder. It also counts each mechanism
(add and subtract modes, a borrow, a skipped carry, both carry-select
choices, the carry out of every adder) and fails if one never occurred.
Every testbench has a time watchdog.

To simulate with Verilator 5, for example the top level:

    verilator --binary --timing --assert -Irtl -Itb rtl/rev_pkg.sv \
        tb/tb_rev_adders_top.sv --top-module tb_rev_adders_top -Mdir obj
    ./obj/Vtb_rev_adders_top

Any other testbench runs the same way. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/rev_pkg.sv rtl/<module>.sv`. Lint
reports only unused-signal and empty-pin warnings. These come from the gate
outputs that reversible logic produces but the adders do not use (the
"garbage" outputs), which are deliberately left open.
