# Precomputation circuits for low-power sequential logic

In a clocked circuit, a block of logic between two registers switches
whenever its input register takes new values, even in cycles where the result
could have been known from only a few of those inputs. *Precomputation* uses
that. A small extra circuit looks at a few of the inputs one cycle early. When
they already decide the output, it stops the other input registers from
loading. The big block then sees almost no input change in the next cycle, so
it barely switches, and the output is still correct. The cost is the small
predictor, a few load enables, and sometimes duplicated registers.

This repository holds synthesizable SystemVerilog for the precomputation
circuits described in the thesis *Precomputation-Based Sequential Logic
Optimization for Low Power*. It covers:

- the two basic architectures;
- the multiple-output generalisation with register duplication;
- the datapath examples: comparator, priority function, maximum, carry-select
  adder, ALU and array multiplier;
- the Shannon-expansion (multiplexer-based) architecture;
- the two-cycle add-compare and add-maximum circuits.

Every circuit has a self-checking testbench. Source comments say "the
document" when they mean that thesis.

## Predictors: g1 and g2

Take a registered function f with inputs x1..xn, and pick a small subset S of
those inputs. Two *predictor* functions of S alone are defined:

- g1 = 1 means f is certainly 1, whatever the other inputs are;
- g2 = 1 means f is certainly 0, whatever the other inputs are.

They can never both be 1. `pc_arch1` and `pc_arch2` assert this. The largest
correct predictors come from universal quantification over the inputs D
outside S:

```
g1(S) = AND over all values of D of  f(S, D)
g2(S) = AND over all values of D of !f(S, D)
```

For the datapath circuits these formulas have simple closed forms, which the
RTL writes out directly. For example, for the comparator C > D with predictor
bits taken from the top of both operands:

- g1 = C_top > D_top;
- g2 = C_top < D_top;
- for a single bit pair, g1 + g2 is the XOR of the two most significant bits.

The generic wrappers (`pc_arch1`, `pc_arch2`, `pc_multi_out`) take f as a
truth-table parameter. The functions `quantify` and `support` in `pc_pkg`
compute the predictor tables at elaboration time. The predictor inputs are
always the K most significant inputs. Choosing the best subset is a
synthesis-time search and is not done in hardware.

## Using the prediction: what is frozen and why the output stays right

This is the part that needs care. Whenever some registers hold stale values,
every consumer of those registers must either not care, or be given a fresh
copy.

**First architecture (`pc_arch1`).** When g1 + g2 = 1, *all* input registers
of the block hold their values. The block then computes a wrong, stale
result. To fix it, g1 and g2 are captured in two flip-flops, and an OR-AND
gate in front of the output register overrides the stale result:

```
R2 <= (A | g1_q) & !g2_q
```

The block saves the most switching this way. The cost is extra delay on the
output path.

**Second architecture (`pc_arch2` and most datapath circuits).** The
predictor inputs are registered normally. Only the registers of the *other*
inputs are frozen. Because g1 and g2 hold for every value of the frozen
inputs, the block evaluates f on fresh predictor inputs and stale other
inputs, and still gets the right answer. No output gate is added.

**Stale registers and duplication.** A frozen register is only safe for
logic whose output does not depend on it in that cycle. Any other reader
needs its own register that always loads:

| circuit | what is frozen | who would read stale data | duplicate |
|---|---|---|---|
| `pc_max` | low bits of the comparator's K, L | the output multiplexer | K and L registered twice |
| `pc_csa` | inputs of the high adder that will not be selected | the other high adder | each high adder has its own A/B high-bit registers |
| `pc_alu` | operands of the half not used this cycle | the other half | A/B registered once per half |
| `pc_multi_out` | inputs of the precomputed outputs G | outputs not in G | inputs in (support(G) - S) and support(F - G) |
| `pc_mult_stage` | A and partial product at the adder | multiplexer bypass leg, next stage | partial product and A registered twice |

`pc_multi_out` is the general case. It has M outputs, and the set G of
outputs named in `SEL` is precomputed. Its load enable is the complement of

```
g = AND over i in G of (g1_i | g2_i)
```

Outputs outside G read an always-loaded copy of the shared inputs. The
default reproduces the thesis's two-output example: f1(x1,x2,x3) is
precomputed from x1 and x2, and f2(x3,x4) is not, so the x3 register is
duplicated.

**Shannon expansion (`pc_shannon`).** This one uses no predictor. f is split
into its two cofactors on x1, and each cofactor has its own copy of the other
inputs' registers. Only the copy selected by x1 loads; the registered x1
drives the multiplexer. This works for any function, including parity, which
no subset of inputs can predict (`tb_table82_parity` shows that the predictor
architectures never fire on it).

## Two-cycle precomputation: add-compare and add-maximum

`pc_add_comp` computes (C+D) > (X+Y) with two register stages: the adders,
then the comparator. The prediction reaches past the adders. Let Sc and Sx be
the sums of the top PA bits:

```
Sc = C_top + D_top
Sx = X_top + Y_top
```

The low N-PA bits can add at most 2*(2^(N-PA) - 1) to either sum, so:

- g1 = (Sc >= Sx + 2) guarantees C+D > X+Y;
- g2 = (Sx >= Sc + 2) guarantees C+D <= X+Y.

With PA = 1 this reduces to C, D most significant bits both 1 and X, Y most
significant bits both 0, or the reverse. When either predictor fires, the low
bits of all four operands are frozen. This removes switching in the adders
in that cycle and in the comparator in the next one. The sums carry their
carry-out (N+1 bits), which the comparison needs. The comparator stage also
has its own single-cycle precomputation on the top PC bits of the two sums.

`pc_add_max` uses the same predictors asymmetrically. g1 freezes only X and
Y, because their sum will not be selected. g2 freezes only C and D. The sum
built from stale bits still compares the right way, so it is never chosen.
The maximum stage is `pc_max`.

## Circuits and default sizes

All registers are clocked on the rising edge, with a synchronous active-low
reset. "Latency" is the number of rising edges from the one that samples
the operands to the one that loads the result, both included. The defaults are the best or only
configuration of each circuit in the thesis, unless marked as a choice of
this design.

| module | function | defaults | latency |
|---|---|---|---|
| `pc_comparator` (uses `pc_cmp_stage`) | C > D | N=16, P=4 bit pairs (8 predictor inputs) | 2 |
| `pc_priority` | one-hot priority, x[0] highest | N=16, K=5 | 2 |
| `pc_max` | MAX(K, L) | N=16, P=4 | 2 |
| `pc_csa` | A+B mod 2^16, carry-select | N=16, LOW=8, P=4 | 2 |
| `pc_add_comp` (uses `pc_add_pre`) | (C+D) > (X+Y) | N=16, PA=2, PC=4 ("8/8") | 3 |
| `pc_add_max` | MAX(C+D, X+Y), N+1 bits | N=16, PA=2, PC=4 | 3 |
| `pc_alu` | 8 operations, see below | W=16 (choice) | 2 |
| `pc_array_mult` (uses `pc_mult_stage`) | unsigned N x N product, pipelined | N=4 | N+1 |
| `pc_arch1` | truth-table f, first architecture | N=6, K=2, 3-bit comparator | 2 |
| `pc_arch2` | truth-table f, second architecture | N=6, K=2, 3-bit comparator | 2 |
| `pc_shannon` | truth-table f, cofactor split on x[N-1] | N=8, parity (choice) | 2 |
| `pc_multi_out` | M truth-table outputs, subset precomputed | N=4, M=2, K=2 | 2 |
| `precomp_top` | all of the above side by side | — | — |

The `hold` and `off*` outputs are combinational from the inputs. They show
that the frozen registers will skip the coming edge, which is convenient for
measuring how often precomputation applies.

ALU opcodes {s0,s1,s2}:

| opcode | operation |
|---|---|
| 000 | A+B |
| 001 | A-B |
| 010 | A << B[3:0] |
| 011 | A >> B[3:0] |
| 100 | AND |
| 101 | OR |
| 110 | XOR |
| 111 | NOT A |

s0 picks the half that loads its operands. Each half yields two results
chosen by s2. A 4:1 multiplexer picks among the four results by the
registered {s0,s1}.

`precomp_top` has no parameters. Its ports are each circuit's ports with a
prefix: `cmp_`, `pri_`, `max_`, `csa_`, `ac_`, `am_`, `alu_`, `mul_`, `a1_`,
`a2_`, `sh_`, `mo_`.

## How often the registers are frozen

`tb_table81` runs every datapath configuration of the thesis's results table
on uniform random operands. For each one it checks the measured disable rate
against the exact value, computed in the testbench by enumeration:

| configuration | predictor inputs | exact disable rate |
|---|---|---|
| comparator | 2 / 4 / 6 / 8 / 10 | 50 / 75 / 87.5 / 93.75 / 96.9 % |
| priority | 1 / 2 / 3 / 4 / 5 / 6 | 50 / 75 / 87.5 / 93.75 / 96.9 / 98.4 % |
| MAX | 8 | 93.75 % |
| carry-select, each high adder | 2 / 4 / 6 / 8 | 25 / 37.5 / 43.75 / 46.9 % |
| add-compare first step | 4 / 8 | 12.5 / 51.6 % |

These agree with the figures the thesis states. The thesis reports power
(for example a 60 % reduction for the comparator with 8 predictor inputs).
That figure depends on gate-level switching in a 2 µm CMOS library and is
not reproduced here.

The same testbench also counts bit toggles on the registers that feed the
comparator and the priority logic. This is the switching the optimisation
removes at the block's inputs. Each count matches its analytic value:
P + (N-P)(1 - hold rate) per cycle for the comparator. Compared with the
plain circuit, the counts fall by:

| comparator predictor inputs | 2 | 4 | 6 | 8 | 10 |
|---|---|---|---|---|---|
| input toggles saved | 47 % | 66 % | 71 % | 70.5 % | 67 % |

| priority predictor inputs | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| input toggles saved | 46.5 % | 65 % | 71 % | 70 % | 67 % | 61.5 % |

Both curves rise quickly, then
fall as more bits join the always-loaded set. That is the same trade-off that
gives the thesis its optimum. The toggle counts leave out the predictor logic
and the internal gates, so they are an upper bound on the saving, not a power
figure.

## Where this RTL makes its own choices

- **Reset.** All registers have a synchronous active-low reset to zero. The
  thesis does not discuss reset.
- **Priority order.** One sentence of the thesis defines f_i with the
  *higher-numbered* inputs taking priority. Its truth table and the rest of
  the text make x1 the highest priority. The RTL follows the truth table:
  `x[0]` is x1.
- **Comparator with more than one predictor bit pair.** The figure shows a
  single XNOR enable. Wider P uses the quantified predictors C_top > D_top and
  C_top < D_top, whose combined enable is top-bit equality.
- **Carry-select predictors for P > 1.** Derived as (a_top + b_top >= 2^P)
  for carry 1 and (a_top + b_top <= 2^P - 2) for carry 0. They reduce to the
  published single-bit equations. No carry-out is produced beyond bit 15.
- **ALU.** The width, the shift amount (the low bits of B, logical shifts)
  and the multiplexer select are choices. The figure labels the 4:1 select
  s[1:2], which alone cannot reproduce the opcode table, so the registered
  {s0,s1} is used.
- **Array multiplier.** Stage 0 is the same precomputed stage with a zero
  partial product, where the figure shows a plain AND stage. The register row
  after a stage's multiplexer is taken to be the next stage's input registers.
- **Generic wrappers.** Functions are truth tables of at most 10 inputs
  (`TT_MAX_IN` in `pc_pkg`). The predictor inputs are the top K inputs, not
  searched. The default functions of `pc_shannon` (parity) and `pc_multi_out`
  (majority and XOR) are choices; the thesis gives only the structure.
- **Not modelled.** The pass-transistor variant for purely combinational
  logic has no register-level equivalent and is not modelled.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pc_pkg.sv tb/tb_precomp_top.sv \
          --top-module tb_precomp_top -Mdir obj_top
./obj_top/Vtb_precomp_top
```

Replace `tb_precomp_top` with any other testbench in `tb/`:

- `tb_<module>` tests each circuit on its own;
- `tb_precomp_top` runs everything end to end at default sizes and counts
  each precomputation mechanism;
- `tb_table81` runs the results-table configurations;
- `tb_table82_parity` runs the parity case.

Each testbench finishes in well under a second. Files in `rtl/` are found
through `-Irtl`, one module or package per file.

## Changing it

- **Sizes.** The predictor width of each circuit is a parameter (`P`, `K`,
  `PA`, `PC`). Setting `PC=0` gives a plain comparator stage.
- **Another function in the generic wrappers.** Pass a truth table as `TT`
  (or `TTS` for `pc_multi_out`). The table is indexed by the input vector,
  with the most significant input as the most significant index bit. `pc_pkg`
  shows how to compute one at elaboration (`cmp_tt`, `parity_tt`,
  `maj3_xor_tt`).
- **Another predictor subset.** The subset is fixed to the top K inputs, so
  reorder the inputs to use a different one.
