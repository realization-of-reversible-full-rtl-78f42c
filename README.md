# Reversible PLA with a reversible full adder and full subtractor

A reversible circuit maps every input vector to a distinct output vector, so no
information is erased while it computes. That is the property wanted for
adiabatic low-power logic and for quantum circuits, and it rules out ordinary
AND and OR gates and even plain fan-out. This RTL builds a **reversible
programmable logic array (RPLA)** out of three reversible gates. A reversible
AND array decodes the inputs into minterms. A reversible OR array of Fredkin
gates combines them. Two applications come with it: a one-bit full adder and a
one-bit full subtractor, each pruned to the product terms it actually needs.

Everything is combinational: there is no clock, no reset and no state. The
SystemVerilog models each reversible gate as ordinary Boolean logic. It
therefore synthesises to normal CMOS gates and simulates with any simulator.
The reversible structure lives in how the gates are wired: every line is
consumed by at most one gate, constant lines go in where a gate needs a fixed
0 or 1, and lines not needed in the result come out as *garbage*.

## The three gates

| Module | Lines | Function | Used here as |
|---|---|---|---|
| `feynman_gate` | 2×2 | `y1 = x1`, `y2 = x1 ^ x2` | complementer (`x2 = 1` gives `~x1`); copier with `x2 = 0` |
| `toffoli_gate` | 3×3 | `p = a`, `q = b`, `r = a&b ^ c` | AND (`c = 0`); both operands come out again on `p`, `q` |
| `fredkin_gate` | 3×3 | `y1 = x1`; `x2`,`x3` swapped when `x1 = 1` | AND on `y3` with `x3 = 0`; OR on `y2` with `x3 = 1` |

Each gate is its own inverse. The Fredkin gate also keeps the number of ones
(it is conservative).

The key trick in every circuit below is the Toffoli pass-through. A Toffoli
AND hands both operands back unchanged, so a literal or a product that is
needed twice goes on to its second gate through the pass-through output of the
first. No copier gates are needed for fan-out.

## The programmable RPLA (`rpla`, `rev_and_array`, `rev_or_array`)

```
 x[N-1:0] ──► rev_and_array ──► word[2**N-1:0] ──► rev_or_array ──► f[M-1:0]
               (Feynman +          (minterms)        (Fredkin,        ▲
                Toffoli)                              programmable)   prog[M-1:0][2**N-1:0]
```

Defaults: `N = 3` inputs, `K = 8` word lines, `M = 2` outputs. Output `f[o]`
is the OR of the minterms `j` with `prog[o][j] = 1`, where minterm `j` is true
when `x == j` (`x[N-1]` is the MSB). Any of the 256 functions of three inputs
can therefore be put on each output. `rev_pkg` holds ready-made program words:

| Program | Minterms | Function |
|---|---|---|
| `PROG_SUM`, `PROG_DIFF` | 1, 2, 4, 7 | `a ^ b ^ c` |
| `PROG_CARRY` | 3, 5, 6, 7 | majority (carry out) |
| `PROG_BORROW` | 1, 2, 3, 7 | `~a&b \| ~a&c \| b&c` (borrow out of `a - b - c`) |

**AND array.** One Feynman gate per input, fed a constant 1, gives the true and
the complemented literal. The products are then built one input at a time. At
level `k`, each of the `2**k` products of `x[k-1:0]` goes into two Toffoli gates
in a row:
- the first ANDs it with `~x[k]`;
- the second receives the product on the first gate's pass-through output and
  ANDs it with `x[k]`.

The literal `x[k]` (and likewise `~x[k]`) runs down a chain of Toffoli gates,
again through pass-through outputs. For `N = 3` this gives:
- 3 Feynman and 12 Toffoli gates;
- 15 constant lines in;
- 8 word lines and 10 garbage lines out.

In general the garbage count is `sum over k=1..N-1 of (2**k + 2)`
(`rev_pkg::and_garbage`).

**OR array.** Each crosspoint (word line `j`, output `o`) uses two Fredkin
gates:
- **AND gate**, inputs `(word, prog, 0)`. It passes the word line on to the
  next output column on `y1` and produces `word & prog` on `y3`.
- **OR gate**, inputs `(product, running sum, 1)`. It ORs the product into the
  column's running sum on `y2`. The running sum starts from a constant 0.

The array has `3·K·M + K` garbage lines (`rev_pkg::or_garbage`). For the
default 8×2 array that is 56, so the whole RPLA has 66.

## The pruned full adder (`rev_full_adder`) and full subtractor (`rev_full_subtractor`)

A complete AND array wastes gates on products no output uses. The two
dedicated circuits keep only what they need.

**Full adder: 18 gates (3 Feynman, 10 Toffoli, 5 Fredkin).**

| Gate | Inputs | Result used |
|---|---|---|
| Feynman ×3 | `a,1` `b,1` `c,1` | literals and complements |
| t1, t2 | `b·c`, `~b·~c` | |
| t3, t4 | `a·(bc)`, `a·(~b~c)` | m7, m4 |
| t5, t6 | `b·~c`, `c·~b` | |
| t7, t8 | `~a·(b~c)`, `~a·(~bc)` | m2, m1 |
| t9, t10 | `a·b`, `a·c` | carry terms |
| f1, f2, f3 | `m1\|m2`, `m4\|m7`, then both | `sum` |
| f4, f5 | `ab\|ac`, then `\| bc` | `carry` |

`bc` is needed twice (for m7 and for the carry). It reaches f5 through the
pass-through output of t3. Line count: 3 data + 18 constant lines in, and
`sum`, `carry` + 19 garbage lines out.

**Full subtractor: 16 gates (3 Feynman, 8 Toffoli, 5 Fredkin).** `x` is the
minuend, `y` the subtrahend and `z` the borrow in. The Toffoli gates build:
- `yz`, `~y~z`, and from them `x·yz` (m7) and `x·~y~z` (m4);
- `~x·y` and `~x·z`, which are borrow terms;
- from those two, `~x·y·~z` (m2) and `~x·~y·z` (m1).

Three Fredkin ORs give `difference`, and two more give
`borrow = ~xy | ~xz | yz`. Line count: 19 in, 19 out, 17 garbage.

The constant lines are an `ancilla` input port, so that a testbench can drive
every line and check that the circuit is a bijection. Tie it to
`rev_pkg::FA_ANCILLA` / `FS_ANCILLA` for normal use. Bit `i` of that vector is
the constant of gate `i`, in the order the gates appear in the source. The top
level does this tie-off.

### How the counts compare with the published figures

The published design gives these figures (gate count, constant inputs, garbage
outputs):
- adder: 18 / 18 / 19, quantum cost 78, logic count 23 XOR + 30 AND + 5 NOT;
- subtractor: 16 / 16 / 17.

The netlists here match all of these. The cost figures use the usual unit
costs: Feynman 1, Toffoli 5, Fredkin 5.

For the subtractor, the published quantum cost (78) and logic count are the
same as the adder's, even though the subtractor has two Toffoli gates fewer.
This netlist gives 68 and 21 XOR + 28 AND + 5 NOT. Quantum depth was not
evaluated.

## What is taken from the publication and what is not

Taken from the published design:
- the three gate definitions;
- the AND array / OR array split;
- the gate types of each array: Feynman + Toffoli for AND, Fredkin for OR;
- the 3-input, 8-word-line size;
- the adder and subtractor gate counts, constant values and signal names.

Choices made here:
- **Toffoli, not Fredkin, for the AND array.** The published description is
  inconsistent on this point. Toffoli gates match its circuit drawings.
- **Exact wiring of the adder and subtractor.** The gate-to-gate wiring is
  this design's own. The product terms were chosen to reproduce the published
  gate counts exactly. The adder's set appears to match the Toffoli controls of the
  published quantum diagram.
- **How the OR array is programmed.** It uses a `prog` input and two Fredkin
  gates per crosspoint.
- **Output count.** `M = 2`.
- **Minterm numbering.** The order in which the AND array builds its products,
  and the minterm numbering, are this design's own.
- **Garbage as ports.** Garbage lines are brought out as ports so that the
  line count stays visible.
- **Minuend of the subtractor.** `x` is taken as the minuend; the publication
  does not say which input it is.

## Top level (`rpla_top`)

`rpla_top` places the programmable RPLA, the adder and the subtractor side by
side, each with its own inputs. Joining their inputs would need fan-out and
make the whole irreversible. Port groups `pla_*`, `fa_*` and `fs_*` belong to
the three circuits. All garbage is brought out.

## Files

`rtl/`:
- `rev_pkg.sv`: size functions, ancilla constants, program words.
- `feynman_gate.sv`, `toffoli_gate.sv`, `fredkin_gate.sv`: the three gates.
- `rev_and_array.sv`, `rev_or_array.sv`, `rpla.sv`: the programmable RPLA.
- `rev_full_adder.sv`, `rev_full_subtractor.sv`: the pruned circuits.
- `rpla_top.sv`: the top level.

`tb/tb_<module>.sv`: one self-checking testbench per module.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_pkg.sv \
          tb/tb_rpla_top.sv --top-module tb_rpla_top -Mdir obj_top
./obj_top/Vtb_rpla_top
```

Substitute another `tb_<module>` to run a single block. Each run takes well
under a second.

What the testbenches check:

- **Gates.** All inputs, plus bijection, self-inverse and (for Fredkin)
  conservation.
- **`tb_rev_and_array`.** One-hot word lines for N = 3 and N = 4, and the
  line-count identity.
- **`tb_rev_or_array`.** Random and one-hot words with random programs, for
  8×2 and 4×3 arrays.
- **`tb_rpla`.** All 256 programs × 8 inputs, then the adder and subtractor
  programs against integer arithmetic. It also checks that no information is
  lost: over all 2^19 input and program values, the 68 output lines never
  repeat.
- **`tb_rev_full_adder` / `tb_rev_full_subtractor`.** Arithmetic with the
  ancilla constants. Reversibility of the whole circuit: all 2^21 (adder) or
  2^19 (subtractor) values of the input lines must give distinct output
  vectors.
- **`tb_rpla_top`.** The whole design at its default sizes. The RPLA is
  switched between the adder program, the subtractor program and random
  programs, and 8-bit ripple additions and subtractions are chained through
  it. The RPLA must agree with the dedicated circuits and with integer
  arithmetic. Each mode and the program switches are counted.

## Changing it

- **More inputs or outputs.** `rpla #(.N(n), .M(m))` scales both arrays.
  `N >= 2` is required. The garbage port widths follow from `rev_pkg`.
- **New functions.** A new 3-input function on the programmable RPLA is just
  a new program word.
- **A new pruned circuit.** Follow the pattern of the adder:
  - pick product terms so that each line feeds exactly one gate, and pass
    shared terms on through Toffoli pass-through outputs;
  - extend the ancilla vector;
  - rerun the bijection check in the testbench to confirm the circuit is still
    reversible.
