# Reversible four-bit signed-magnitude adder/subtractor

This is an adder/subtractor for four-bit **signed-magnitude** numbers. Each
number is a sign bit plus a three-bit magnitude, so the range is -7..+7. The
circuit is built only from **reversible gates**. In a reversible gate the
outputs determine the inputs uniquely, and a gate has as many outputs as
inputs. Such circuits are the building blocks studied for low-dissipation and
quantum computing. The price is paid in three ways:

- **Constant inputs** (0 or 1) feed gates that need more inputs than the logic has.
- **Garbage outputs** are lines whose values nobody uses.
- **Explicit fan-out gates** are needed because a line cannot be split.

Signed-magnitude is the usual format of floating-point mantissas. Adding in
this format means more than adding bits. The circuit has to:

- decide from the signs and the requested operation whether the magnitudes are added or subtracted;
- find out which magnitude is larger;
- take the two's complement of a negative difference;
- make sure that an equal-magnitude subtraction gives +0 and never -0.

Two complete circuits are given. Both compute the same function:

| | Design I (`sm_addsub_d1`) | Design II (`sm_addsub_d2`) |
|---|---|---|
| magnitude adder | HNG full adders, subtraction as A + ~B + 1 | ADD/SUB full adder/subtractor gates, direct A - B |
| reversible gates | 26 | 23 |
| constant inputs | 17 | 17 |
| garbage outputs | 21 | 21 |

NOT gates are not counted as gates. Design I is the cheaper one in quantum
cost. Design II uses fewer gates.

## Result format

The result has five bits: `S_s, E, S2, S1, S0`. `S_s` is the sign. `{E, S2..S0}`
is a **four-bit magnitude**. Adding two magnitudes of up to 7 gives up to 14.
A three-bit magnitude would overflow there. In this circuit the carry appears
as bit 3 (`E`) instead, so every result is exact. `E` can only be 1 after a
magnitude addition. After a magnitude subtraction it is forced to 0.

Examples, in the order sign, E, S:

| operation | result |
|---|---|
| (-2) + (-6) | `1 1 000` = -8 |
| (-2) - (-3) | `0 0 001` = +1 |
| (+5) - (+5) | `0 0 000` = +0 |

## The algorithm

`Ctrl = A_s ^ B_s ^ C_F/S`. `C_F/S` = 0 requests A + B, 1 requests A - B.

| Ctrl | magnitude comparison | magnitude result | sign |
|---|---|---|---|
| 0 (add magnitudes) | any | A + B, carry in E | A_s |
| 1 (subtract magnitudes) | A > B | A - B | A_s |
| 1 | A = B | 0 | 0 (forced +) |
| 1 | A < B | B - A, obtained as the two's complement of A - B | ~A_s |

Negative-zero operands are allowed at the input. They follow the same table,
so (-0) + (-0) gives -0. Only such operands can produce -0. Every other
operation yields +0 for a zero result.

## Gate library

Every gate is a module of its own. The composite circuits are structural
netlists of these gates.

| module | gate | outputs |
|---|---|---|
| `fg_gate` | Feynman | P=A, Q=A^B (copy with B=0, invert with B=1) |
| `f2g_gate` | double Feynman | P=A, Q=A^B, R=A^C |
| `frg_gate` | Fredkin | P=A; Q = A ? C : B; R = A ? B : C (2:1 multiplexer on Q) |
| `pg_gate` | Peres | P=A, Q=A^B, R=AB^C (AND with C=0) |
| `hng_gate` | HNG | P=A, Q=B, R=A^B^C, S=(A^B)C^AB^D (full adder with D=0) |
| `hnfg_gate` | HNFG | P=A, Q=A^B, R=C, S=C^D (two copies) |
| `nlg_gate` | NLG | P=A, Q=XNOR(A,B) |
| `addsub_gate` | ADD/SUB | P=A^B^C, Q=carry (F=0) or borrow of A-B-C (F=1), R=A, S=F^B |
| `tcg_gate` | two's complement gate | P=A, Q=A^B, R=A^B^C^AB |

The **two's complement gate** is the circuit's own contribution. Note that
`A^B^AB = A|B`, so `R = (A|B)^C`. Connect `A=S0, B=S1, C=S2`. The outputs are
then the three-bit two's complement of S:

- bit 0 is kept;
- bit 1 flips if bit 0 is set;
- bit 2 flips if either lower bit is set.

The gate is its own inverse. Applying it twice returns the inputs.

## Design I, stage by stage

1. **Operation decoder** (`ctrl_gen`). Two Feynman gates give `A_s^B_s` (garbage g1) and then `Ctrl`.
2. **Magnitude adder/subtractor** (`rca_hng3`).
   - A Feynman gate copies Ctrl onto a 0 line to make the carry-in.
   - One Feynman gate per bit forms `B_i ^ Ctrl` and passes Ctrl on to the next bit.
   - Three HNG gates ripple the carry.
   - Result: `{E,S} = A+B` or `A+~B+1`. In a subtraction, E=1 means A >= B.
   - On its own, this three-bit adder/subtractor has 9 gates, 4 constant inputs and 9 garbage lines. Design I reuses two of those lines: A_s, and Ctrl after the last B gate.
   - A further Feynman gate with a 0 input splits that Ctrl line in two, one for the sign logic and one for K.
3. **Result fan-out.** A Feynman gate copies S0 and an HNFG gate copies S1 and S2.
   - One copy feeds the two's complement gate, which gives `2'S`.
   - The other copy feeds the **zero detector** (`zero_det_pg`).
     - The detector inverts the three bits (NOT gates on S0 and S2, a Feynman gate with a 1 input on S1).
     - Two Peres gates AND the inverted bits into `F(A=B)`.
     - S0 and S2 are inverted back and leave again for the output multiplexers.
4. **Sign.**
   - A double Feynman gate `F2G(A_s,0,1)` gives A_s twice and ~A_s once.
   - A Fredkin gate controlled by `F(A=B)` gives `S_s* = F ? 0 : A_s`.
   - Fredkin F1, controlled by E, chooses `S_s*` (E=1) or `~A_s` (E=0).
   - Fredkin F2, controlled by Ctrl, chooses A_s (Ctrl=0) or F1's output (Ctrl=1).
5. **Correction control.**
   - A Feynman gate with a 1 input gives ~E.
   - A Peres gate gives `K = Ctrl & ~E`, which is 1 only when a subtraction found A < B.
6. **Result multiplexers.**
   - Fredkin gates F4, F5 and F6 are chained on K. Each passes `S_i` or `2'S_i`.
   - Fredkin F3, controlled by Ctrl, passes E only for a magnitude addition.

## Design II: what changes

`rca_asg3` replaces the HNG ripple.

- Ctrl is fanned out by two `F2G(Ctrl,0,0)` gates.
- Three ADD/SUB gates are driven with `F = Ctrl`. The carry/borrow input of bit 0 is the constant 0.
- A subtraction now produces `A - B mod 8` with a **borrow**: E = 1 means A < B. This is the opposite of design I. Three details follow from it:
  - Fredkin F1 takes its data inputs the other way round: `S_s*` when E=0 and `~A_s` when E=1.
  - The correction control becomes `K = ~(Ctrl & E)`. It is made by a Feynman gate with a 0 input, a Peres gate and a NOT.
  - Because K is now active low, F4 to F6 pass `S` for K=1 and `2'S` for K=0.

Everything else is the same as in design I: decoder, result fan-out, two's
complement gate, zero detector and F3.

## Stand-alone zero comparator

`zero_cmp_nlg` is a second way of testing a three-bit value for zero.

- Three NLG gates with 0 inputs produce ~S0, ~S1 and ~S2.
- Two Peres gates AND them into `F(A=B)`.

It uses 5 gates, 5 constant inputs and 7 garbage outputs. The adders use the
cheaper Feynman/Peres detector described above. The NLG version is instantiated
in the top level with its own ports.

## Constant inputs, garbage and reversibility

- The garbage outputs of each design come out on a 21-bit port `g`, numbered g1..g21 (`g[0]` = g1):
  - g1: the decoder;
  - g2..g7: the adder pass-throughs;
  - g8, g9: the zero detector;
  - g10: the K Peres gate;
  - g11..g21: the Fredkin gates, in the order above.
- Constant inputs are written as literals at the gate pins.
- Line count: 9 data inputs plus 17 constants give 26 lines, and 5 result bits plus 21 garbage bits give 26 lines.
- The design testbenches check that the circuit really is reversible. No two of the 512 input patterns may give the same 26-bit output pattern.
- Several garbage bits are plain copies of inputs, for example the A pass-through of an HNG gate. Synthesis reports them as outputs wired straight to inputs. That is expected for garbage lines.

## Hierarchy

```
sm_addsub_top
├── sm_addsub_d1   design I
│   ├── rca_hng3   ctrl_gen, fg_gate x4, hng_gate x3
│   ├── fg_gate                     second Ctrl line
│   ├── fg_gate, hnfg_gate          result fan-out
│   ├── tcg_gate                    two's complement of S
│   ├── zero_det_pg                 fg_gate, pg_gate x2
│   └── f2g_gate, frg_gate x7, fg_gate, pg_gate
├── sm_addsub_d2   design II
│   ├── ctrl_gen
│   ├── rca_asg3   f2g_gate x2, addsub_gate x3
│   └── (same back end as design I)
└── zero_cmp_nlg   nlg_gate x3, pg_gate x2
```

`rev_pkg` holds the operand struct `sm_op_t`, the result struct `sm_res_t`
and the width constants. The top level takes `sm_op_t` operands and gives
`sm_res_t` results for each design, plus the garbage vectors.

## Timing

All logic is combinational. There is no clock, no reset and no state. The
longest path runs through the three-stage carry ripple. It continues through
the zero detector and the sign multiplexers, or through K and the chained
result Fredkin gates. No delays are modelled.

## Where this RTL makes its own choices

- **Unstated gate functions.** The Feynman, double Feynman, Fredkin, Peres, HNG and HNFG functions are the standard ones from the reversible-logic literature.
- **ADD/SUB carry/borrow output.** It is specified separately for the add and subtract modes. Here it is written as one expression with A replaced by `A ^ F`.
- **Fredkin pins and garbage.** Where a gate diagram does not make clear which Fredkin data pin takes which signal, or which output is garbage, the choice here gives the algorithm above. The gate, constant and garbage counts are not changed by it.
- **Zero test equation.** The zero test is `~S2 & ~S1 & ~S0`. The equation behind it is sometimes written as `(S2^0)(S1^0)(S0^0)`, but that product detects all ones.
- **Zero detector inside the adders.** The adders use the Feynman/Peres detector of the full gate-level circuit, not the NLG comparator. Only with that detector do the gate counts come out at 26/17/21 and 23/17/21.
- **Position of the Ctrl fan-out gate in design I.** The Feynman gate that makes the second Ctrl line sits after the three-bit adder, on the Ctrl line the adder passes on. A drawing of the full circuit may place it before the B gates instead. Placed here, the adder stays the stand-alone three-bit circuit, and the counts are unchanged.
- **Quantum realisations.** The V/V+ realisations of the gates and their quantum costs are outside the scope of RTL.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The testbenches of the composite circuits
also use `tb/sm_ref_pkg.sv`, an independent model of the algorithm. For
example:

```
verilator --binary --timing -Irtl -Itb rtl/rev_pkg.sv tb/sm_ref_pkg.sv \
          tb/tb_sm_addsub_top.sv --top-module tb_sm_addsub_top -Mdir obj
./obj/Vtb_sm_addsub_top
```

The gate testbenches need only `-Irtl` and their own file.

What the testbenches check:

- **Gates.** All input patterns, against reference equations written independently. The two's complement gate is checked against its published truth table. Every gate is also checked for being a bijection.
- **Composite blocks.** Exhaustive:
  - 512 patterns for the adder/subtractors and `rca_hng3`;
  - 128 patterns for `rca_asg3`;
  - 8 patterns for the zero detectors.
- **Designs I and II.** Each additionally checks four things:
  - the integer value of every result;
  - that no operation without a -0 operand gives -0;
  - reversibility;
  - one published simulation point: (-2)+(-6) for design I and (-2)-(-3) for design II.
- **Top level** (`tb_sm_addsub_top`).
  - It runs all 512 operations through both designs, each in a different order, and sweeps the zero comparator.
  - It counts every mechanism and fails if one never occurs: magnitude addition, carry into E, A > B, the forced + sign for A = B, the two's complement correction for A < B, and both comparator outcomes.
  - The design is tiny, so the whole test runs in well under a second.
