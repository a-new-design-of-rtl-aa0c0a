# Reversible half and full subtractors built on the TR gate

A reversible circuit maps every input vector to a distinct output vector, so
it loses no information. Such circuits are the building blocks of quantum
and other reversible computing. Their cost is usually counted in three ways:

- **Quantum cost:** the number of elementary 1x1 and 2x2 gates (NOT, CNOT,
  controlled-V, controlled-V+).
- **Delay:** the logic depth in those gates, in units of Δ.
- **Garbage outputs:** outputs that exist only to keep the circuit reversible.

This RTL describes subtractors built around the **TR gate**, a 3-input,
3-output reversible gate:

    (A, B, C)  ->  (P = A,  Q = A xor B,  R = (A and not B) xor C)

With C = 0, the TR gate on its own computes both outputs of a half
subtractor. The TR gate can be built from only four 2x2 gates. That gives:

| circuit                  | quantum gates | quantum cost | delay | garbage outputs |
|--------------------------|---------------|--------------|-------|-----------------|
| TR gate                  | V+, CNOT, V, V | 4 | 4Δ | – |
| half subtractor (1 TR)   | same as TR    | 4 | 4Δ | 0 |
| full subtractor (2 TR)   | 8             | 8 | 8Δ | 0 |
| full subtractor, optimised | 6           | 6 | 6Δ | 0 |

For comparison, widely cited earlier designs cost 7 (half subtractor) and 15
(full subtractor). Those earlier designs are not included here.

An output that only returns an input unchanged, such as P = B, does not count
as garbage.

## Modelling V and V+ in two-valued logic

V is the square root of NOT. V+ is its inverse. They obey:

    V·V = NOT     V+·V+ = NOT     V·V+ = V+·V = identity

A single V applied to |0> or |1> leaves a state that is not 0 or 1. Such a
state has no Boolean value. Yet all the circuits here keep these states on
one line only, the *target line*. Each circuit ends with that line back at 0
or 1.

The package `rev_pkg` models this exactly. Every control input in these
circuits is classical. Only the target line is ever acted on by V or V+. And
|1> = V²|0>. So every state the target line can reach is V^k|0> for some k in
0..3, and the line is carried as that 2-bit count k (`rev_pkg::qturn_t`):

| k | state  | Boolean value |
|---|--------|---------------|
| 0 | \|0>    | 0             |
| 1 | V\|0>   | none          |
| 2 | \|1>    | 1             |
| 3 | V\|1>   | none          |

The gates act on k as follows, all modulo 4:

- A controlled-V adds 1 when its control is 1.
- A controlled-V+ subtracts 1 when its control is 1.
- A NOT adds 2.

The helper functions are `qt_from_bit`, `qt_is_basis` and `qt_to_bit`.
Every quantum-level circuit asserts that its target line ends with even k.

So a quantum-level circuit reduces to a sum. The target line's final k is
the sum of ±1 over the V gates whose controls are 1. The circuit is correct
if that sum is 2 exactly when the output bit should flip, and 0 otherwise.
This is the argument the module headers spell out for each gate.

The encoding is this design's own. It covers the circuits here, not quantum
circuits in general: it cannot express states whose controls are themselves
in superposition.

## The TR gate at gate level (`tr_gate_q`)

Lines A, B and target C. The four gates, in order:

1. controlled-V+, control B
2. CNOT, A onto B. The B line now holds A xor B.
3. controlled-V, control A
4. controlled-V, control A xor B

The target receives −B + A + (A xor B) quarter turns:

| A B | turns | effect on C |
|-----|-------|-------------|
| 0 0 | 0     | none |
| 0 1 | −1 + 1 = 0 | none: gates 1 and 4 cancel |
| 1 0 | 1 + 1 = 2  | NOT: gates 3 and 4 in series |
| 1 1 | −1 + 1 = 0 | none: gates 1 and 3 cancel |

That is R = (A and not B) xor C. The target line stays in encoded form at
the ports, so TR gates can be chained on one target line.

`tr_gate` is the same mapping written as Boolean logic. It is the form a
conventional CMOS implementation would use.

## Half subtractor (`half_sub`)

The TR gate is fed (B, A, 0):

- P = B: the subtrahend, passed back out.
- Q = A xor B: the difference.
- R = (not A) and B: the borrow.

There are no garbage outputs.

## Full subtractor (`full_sub`, `full_sub_q`, `full_sub_opt`)

The full subtractor computes A − B − C from two TR gates:

- **TR 1**, inputs (B, A, 0), gives B, A xor B and (not A)·B.
- **TR 2**, inputs (C, A xor B, (not A)·B), gives:
  - C
  - the difference: A xor B xor C
  - the borrow: C·not(A xor B) xor (not A)·B

The two borrow terms can never both be 1, so this xor equals the familiar OR
form of the borrow.

There are three versions of this circuit:

- **`full_sub`:** the two-TR circuit built from Boolean `tr_gate`s.
- **`full_sub_q`:** the same circuit built from two `tr_gate_q`s sharing one
  target line. That is 8 gates. Gate 4 (V, control A xor B) and gate 5
  (V+, same control) sit next to each other on the target line.
- **`full_sub_opt`:** `full_sub_q` without gates 4 and 5, because V·V+ is the
  identity. That leaves 6 gates:

  1. V+, control A
  2. CNOT, B onto the A line
  3. V, control B
  4. CNOT, C onto the A line
  5. V, control C
  6. V, control A xor B xor C

  The target receives −A + B + C + (A xor B xor C) quarter turns. That sum
  is 2 exactly for the four input vectors that borrow, and 0 for the others.

`full_sub_opt` is the design's main full subtractor.

## The TR gate's inverse (`peres_gate`, `peres_gate_q`)

To invert the TR gate:

- A = P
- B = P xor Q
- C = R xor (P and Q)

This is the Peres gate: (A, B, C) -> (A, A xor B, A·B xor C). A Peres gate
placed after a TR gate therefore restores A, B and C. That lets TR-based
circuits clean up their own intermediate values without garbage.

`peres_gate_q` is the 4-gate realisation:

1. V+, control A
2. V+, control B
3. CNOT, A onto B
4. V, control A xor B

## Top level (`reversible_subtractor_top`)

The top holds the circuits side by side, each with its own ports:

| prefix | circuit |
|--------|---------|
| `hs_`  | half subtractor |
| `fs_`  | optimised full subtractor |
| `fsq_` | 8-gate full subtractor |
| `fsb_` | Boolean two-TR full subtractor |
| `tri_` | TR then Peres, quantum-gate level |
| `trb_` | TR then Peres, Boolean |

In the TR/Peres pairs, `*_p/q/r` are the TR outputs. `*_ra/rb/rc` are the
Peres outputs, which equal the inputs again.

Everything is combinational: there is no clock or reset, and all ports are
single bits.

## Where this RTL departs from, or adds to, the source design

- **The quarter-turn encoding of V states** is an addition. The published
  design reasons about V and V+ as unitary gates, not as logic.
- **Delay and quantum cost are not simulated.** They are the structural
  gate counts and depths above. Each quantum-level module records them as
  `QUANTUM_COST` and `DELAY` localparams.
- **The full subtractor's borrow** is implemented in the two-TR form,
  C·not(A xor B) xor (not A)·B, and checked against the full-subtractor
  truth table in all eight rows.
- **The multi-bit ("parallel") subtractor** belongs to the TR gate's
  original family of circuits but is not specified here, so it is not
  provided. Its width and borrow chaining are not given.
- **Not included:** the baseline circuits used for comparison, namely the
  Toffoli gate, the NOT gate, and the earlier half and full subtractors.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M`.

**Leaf testbenches.** The circuits have at most three inputs, so every
testbench is exhaustive:

- **Truth tables.** The testbenches check the half subtractor, TR gate and
  full subtractor truth tables, plus A − B (− C) = Diff − 2·Borr.
- **Gate algebra.** The `cv_gate` testbench covers every control and
  target-state pair, and the V·V, V+·V+, V·V+ and V+·V chains.
- **Non-basis inputs.** The TR and Peres gate-level testbenches also drive
  the target with non-basis states.
- **Hand-worked TR cases.** The TR testbench probes the internal controls
  for the ABC = 101 and 111 cases.
- **Inverse.** The Peres testbenches check that TR and Peres undo each other.

**Top-level testbench.** `reversible_subtractor_top_tb` sweeps all 2^16
combinations of the top's inputs. It counts, and requires at least once,
each of these:

- a borrow from the half subtractor and from the full subtractor
- V·V acting as NOT on the TR target line
- V+·V cancelling on the TR target line
- a non-basis state mid-circuit
- the V/V+ pair that the optimisation removes being active while both
  full subtractors agree
- a TR→Peres round trip

Running with plain Verilator (5.x), from the directory above `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        rtl/rev_pkg.sv tb/reversible_subtractor_top_tb.sv -y rtl \
        --top-module reversible_subtractor_top_tb
    ./obj_dir/Vreversible_subtractor_top_tb

For any other module, substitute its testbench name. `rev_pkg.sv` must come
first, because the modules import it.
