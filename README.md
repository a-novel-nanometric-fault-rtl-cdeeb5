# Parity-preserving reversible subtractors

A reversible circuit maps each input pattern to exactly one output pattern.
Nothing is erased, so the circuit needs as many output lines as input lines.
Because it does not lose information, it can in principle compute without the
energy cost of erasing bits. The price is bookkeeping:

- **Constant inputs** are extra lines held at 0 that make a function fit a
  reversible gate.
- **Garbage outputs** are extra lines that carry nothing useful but must exist
  so the mapping stays one-to-one.
- **Quantum cost** is the number of 1x1 and 2x2 quantum primitives needed.

Reversible netlists also forbid fan-out. A signal that is needed twice must be
copied by a gate.

This RTL builds four small reversible circuits from two **parity-preserving**
gates. In such a gate, the XOR of the three inputs always equals the XOR of the
three outputs. A cascade of these gates keeps the same property end to end:

    parity(all inputs, constants included) == parity(all outputs, garbage included)

If any single line inside the cascade flips, the equality breaks. A parity
comparator on the boundary of the circuit therefore detects every
single-line fault. That check is what makes these circuits fault-detecting
(called "fault tolerant" in the reversible-logic literature).

The four circuits:

| circuit | function | gates | constant inputs | garbage outputs | quantum cost |
|---|---|---|---|---|---|
| half subtractor | A - B: diff = A^B, borrow = A'B | 1 F2G + 1 FRG | 2 | 2 | 7 |
| full subtractor | A - B - C: diff = A^B^C, borrow = A'B + A'C + BC | 3 F2G + 1 FRG | 4 | 5 | 11 |
| Peres gate | P = A, Q = A^B, R = AB^C | 2 F2G + 1 FRG | 2 | 2 | 9 |
| TR gate | P = A, Q = A^B, R = AB'^C | 2 F2G + 1 FRG | 2 | 2 | 9 |

The Peres and TR gates are well-known reversible gates, but they do not
preserve parity. The last two rows realise them from parity-preserving gates,
so that they can be used inside a fault-detecting design.

## The two gates

**F2G, Feynman double gate** (`f2g_gate`). It computes P = A, Q = A^B and
R = A^C. A is the control, and it is XORed into both other lines. Parity is
preserved because A appears three times on the output side, which is the same
as once. With B = C = 0, the gate makes two copies of A. That is how these
circuits fan a signal out. Quantum cost 2.

**FRG, Fredkin gate** (`frg_gate`). It is a controlled swap: P = A,
Q = A'B ^ AC and R = A'C ^ AB. When A = 0, B and C pass straight through. When
A = 1, they trade places. The outputs are a reordering of the inputs, so the
number of ones does not change. Quantum cost 5.

Both gates are their own inverse. The cost constants live in `rev_pkg`.

## How each circuit works

The gate lists below give the inputs of each gate in A, B, C order. "g[n]" is
bit n of the module's `garbage` port.

### Half subtractor (`pp_half_subtractor`)

    F2G (B, A, 0)    -> B, A^B, B[g0]
    FRG (A^B, B, 0)  -> A^B = diff,  (A^B)'B = AB [g1],  (A^B)B = A'B = borrow

The F2G forms the difference and also passes B on. The Fredkin gate is
controlled by the difference:

- When A = B, the gate does not swap. B stays on the Q line (giving AB) and
  borrow gets the constant 0.
- When A != B, B is swapped onto the R line. It is then 1 only for A = 0,
  B = 1, which is the borrow.

### Full subtractor (`pp_full_subtractor`)

    F2G #1 (B, A, 0)        -> B, A^B, B [g0]
    F2G #2 (C, 0, 0)        -> C, C, C [g1]
    FRG    (A^B, C, B)      -> A^B,  (A^B)'C ^ (A^B)B = borrow,  (A^B)'B ^ (A^B)C [g2]
    F2G #3 (A^B, C, 0)      -> A^B [g3],  A^B^C = diff,  A^B [g4]

The borrow is a selection controlled by A^B:

- When A = B, the subtraction A - B produces no borrow of its own, so the
  borrow-in C passes through.
- When A != B, the borrow is B, which is 1 exactly when A = 0 and B = 1.

This equals A'B + A'C + BC. F2G #2 copies C twice, because C is needed both
by the Fredkin gate and by the difference gate.

### Peres gate (`pp_peres_gate`)

    FRG        (A, B, 0)      -> A, A'B, AB
    F2G upper  (AB, C, A'B)   -> AB [g0],  AB^C = R,  AB^A'B = B
    F2G lower  (A, B, 0)      -> A = P,  A^B = Q,  A [g1]

The Fredkin gate splits B into its two halves, A'B and AB. The upper F2G does
two jobs:

- it XORs AB into C, giving R;
- it recombines A'B and AB into B.

The lower F2G then forms A^B from A and the rebuilt B.

### TR gate (`pp_tr_gate`)

    FRG        (B, A, 0)      -> B, AB', AB
    F2G upper  (AB', C, AB)   -> AB' [g0],  AB'^C = R,  A
    F2G lower  (A, B, 0)      -> A = P,  A^B = Q,  A [g1]

This is the same pattern as the Peres gate with the roles of A and B swapped
at the Fredkin gate. B controls the swap and A is split into AB' and AB. With
C = 0, R = AB' is the borrow of B - A, so the TR gate alone is a half
subtractor.

## Fault detection (`parity_checker`, `pp_subtractor_top`)

`parity_checker` XOR-reduces a complete input vector and a complete output
vector, and raises `error` when the two parities differ. The widths are
parameters (`IN_WIDTH` and `OUT_WIDTH`, both 3 by default). The checker itself
is ordinary irreversible logic. It is the simplest circuit that applies the
parity rule, and is not a reversible design.

`pp_subtractor_top` places the four circuits side by side, each with its own
ports and its own checker:

| prefix | circuit | checker inputs | checker outputs | flag |
|---|---|---|---|---|
| `hs_` | half subtractor | {a, b, 0, 0} | {diff, borrow, garbage[1:0]} | `hs_fault` |
| `fs_` | full subtractor | {a, b, c, 0, 0, 0, 0} | {diff, borrow, garbage[4:0]} | `fs_fault` |
| `pg_` | Peres gate | {a, b, c, 0, 0} | {p, q, r, garbage[1:0]} | `pg_fault` |
| `tr_` | TR gate | {a, b, c, 0, 0} | {p, q, r, garbage[1:0]} | `tr_fault` |

A flag is 0 in a fault-free circuit. It goes to 1 whenever one line between
two gates carries the wrong value. The end-to-end testbench shows this by
forcing each internal line to 0 and to 1. The garbage lines are brought out as
ports because the check needs them. They carry no result.

The design has no clock, no reset and no state. Every output is a
combinational function of the current inputs.

## Where this RTL departs from, or fills in, the published description

- **Full-subtractor counts.** The published prose gives the full subtractor
  one constant input and four garbage outputs. That cannot be true: for a
  3-input, 2-output function built from 3x3 gates, garbage = constants + 1.
  The published circuit diagram has 4 constant inputs and 5 garbage outputs,
  and this RTL follows the diagram. The gate count (4) and quantum cost (11)
  agree with the prose.
- **Fredkin equations.** One published form of the Fredkin equations is not a
  controlled swap. The RTL uses the controlled swap given by the gate symbol,
  the truth table and the description of the gate.
- **TR gate.** One published form of the TR gate is R = A^B^C. The RTL uses
  R = AB'^C. That is the form in the gate symbol, and it is what the
  parity-preserving TR circuit computes.
- **Half-subtractor borrow.** The borrow is A'B, the correct borrow of A - B.
  A published equation gives AB.
- **Choices made here.** The following are design choices, not part of the
  published description:
  - the port names;
  - the order of the garbage bits;
  - tying the constant inputs to 0 inside each module;
  - the parity checker circuit;
  - combining all four circuits in one top.
- **Not built.** The other reversible gates from the literature (NOT, Feynman,
  Toffoli, plain Peres and TR, New gate, NFT) are not part of this design. No
  multi-bit subtractor is built from the cells. The published work suggests
  that use but does not describe a multi-bit design.

Quantum cost, constant and garbage counts are properties of the reversible
netlist. Each circuit module declares them as `localparam`s
(`GATE_COUNT`, `CONST_INPUTS`, `GARBAGE_OUTPUTS`, `QUANTUM_COST`), and its
testbench checks them. They have no effect on the logic. Synthesised to CMOS,
each gate becomes a few XOR/AND/MUX cells. Reversibility and the energy
argument belong to the reversible-logic view of the netlist, not to a
standard-cell implementation.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | quantum-cost constants of F2G and FRG |
| `rtl/f2g_gate.sv`, `rtl/frg_gate.sv` | the two parity-preserving gates |
| `rtl/pp_half_subtractor.sv`, `rtl/pp_full_subtractor.sv` | the subtractors |
| `rtl/pp_peres_gate.sv`, `rtl/pp_tr_gate.sv` | parity-preserving Peres and TR gates |
| `rtl/parity_checker.sv` | input/output parity comparator |
| `rtl/pp_subtractor_top.sv` | top: four circuits and four checkers |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

## Verification

Every testbench is exhaustive over its data inputs.

- **Gate testbenches** compare the gates with the 8-row truth tables. They
  also check parity preservation, and that the outputs form a permutation of
  the inputs.
- **Subtractor testbenches** check the arithmetic: A - B = diff - 2*borrow
  and A - B - C = diff - 2*borrow. They also check every garbage line, output
  parity and the bookkeeping constants.
- **`tb_pp_subtractor_top`** drives all 2^11 input combinations of the top
  and checks all four circuits. It then injects stuck-at-0 and stuck-at-1
  faults on all 15 internal lines. It counts how often each behaviour occurs
  and fails if any never happens:
  - a half-subtractor borrow;
  - a full-subtractor borrow generated by A'B;
  - a full-subtractor borrow passed on from C;
  - the AB and AB' terms of the Peres and TR gates;
  - a detected fault in each circuit.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Wall -Wno-UNUSEDPARAM \
      rtl/rev_pkg.sv rtl/f2g_gate.sv rtl/frg_gate.sv rtl/pp_half_subtractor.sv \
      rtl/pp_full_subtractor.sv rtl/pp_peres_gate.sv rtl/pp_tr_gate.sv \
      rtl/parity_checker.sv rtl/pp_subtractor_top.sv tb/tb_pp_subtractor_top.sv \
      --top-module tb_pp_subtractor_top
    ./obj_dir/Vtb_pp_subtractor_top

The top-level test uses `force`/`release` on internal nets such as
`dut.u_fs.a_xor_b`. If you rename a net inside a circuit, update the list of
injected lines in `tb/tb_pp_subtractor_top.sv`. The only lint warnings
(`UNUSEDPARAM`) are about the bookkeeping `localparam`s, which are read by the
testbenches and not by the logic.
