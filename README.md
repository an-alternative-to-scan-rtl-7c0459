# Checking-experiment testable sequential machines

Scan design makes a sequential circuit testable by cutting it into flip-flops
and combinational logic and testing the logic with generated patterns. This
design takes another route. The machine gets one extra input, `eps`. With it,
the machine has a synchronising sequence and a distinguishing sequence that
can be compacted. A *checking experiment* can then be run on it at full
clock speed. That experiment identifies every state and checks every
transition, so it works whatever the gate-level implementation and whatever
the fault model. A small verifier on each output compacts and checks the
output stream as the experiment runs. At the end one bit, `fail`, says
whether the machine is faulty.

The RTL contains:

* the circuit modification for a single-output machine built from `NU` T
  flip-flops (`gstar_sec4`, `eps_augment`). It costs `4*NU-1` two-input
  gates plus an inverter in the next-state path, and three gates in the
  output path;
* the general state-table augmentation for a machine with `L` outputs and
  `Q**L` states (`gstar_alg1`, `eps_digit_fn`);
* the per-output verifier (`verifier`, `f_register`);
* a top (`ce_top`) that puts both machines side by side, each with its
  verifiers and its `fail` bit.

The original machine's own logic is not part of this RTL. The method works
for any machine, so `ce_top` brings that logic's signals out as ports. The
source that applies the experiment and supplies the reference values is also
outside; the testbenches play that part.

## What `eps` does to the machine

Number the states `0 .. n-1`. Applying `eps` in state `i` moves the machine
to `i-1`, except that state 0 stays in state 0. Two things follow:

* **Synchronising sequence.** `eps` applied `n-1` times takes any state to 0.
* **Distinguishing sequence.** While `eps` is applied, the output is
  `beta(i)` of the current state. This design offers two `beta` functions
  (`ce_pkg::beta_e`):

  | `beta`                           | value         | output stream of `eps**n` from state `i`  | compaction that yields `i` |
  |----------------------------------|---------------|--------------------------------------------|----------------------------|
  | `BETA1_PARITY`                   | `i mod 2`     | `i mod 2, (i-1) mod 2, ..., 1, 0, 0, ...`  | transition count           |
  | `BETA2_NONZERO`, `BETA3_NONZERO` | `1` if `i > 0`| `i` ones, then zeros                       | syndrome (ones count)      |

  Either way, a single compacted word identifies the start state. No bit
  sequence has to be stored or compared.

For inputs other than `eps`, the machine behaves exactly as before.

### Multiple outputs (`eps_digit_fn`, `gstar_alg1`)

With `L` outputs and `n = Q**L` states, the state number is read as `L`
base-`Q` digits. `eps` decrements every digit on its own and holds it at 0.
Output `k` shows `beta(digit k)`. Each output's stream therefore depends only
on its own digit, and the `L` verifiers together identify the state. After
`Q-1` applications of `eps`, every state has reached 0. Example for `Q = 3,
L = 2` with `beta2`, where outputs are written as (`out[1]`, `out[0]`):

| state (digits) | next state under `eps` | outputs |
|----------------|------------------------|---------|
| 8 (2,2)        | 4 (1,1)                | 1,1     |
| 7 (2,1)        | 3 (1,0)                | 1,1     |
| 6 (2,0)        | 3 (1,0)                | 1,0     |
| 5 (1,2)        | 1 (0,1)                | 1,1     |
| 2 (0,2)        | 1 (0,1)                | 0,1     |
| 0 (0,0)        | 0 (0,0)                | 0,0     |

`gstar_alg1` realises this as a binary state-number register and a selector:
`eps ? eps_digit_fn : original machine`.

## Modifying a T flip-flop circuit (`gstar_sec4`, `eps_augment`)

This is the hardware trick that makes the method resemble scan. The original
single-output machine is a block of combinational logic that drives the T
inputs of `NU` toggle flip-flops (`n = 2**NU`). The states are assigned codes
so that the `eps` chain becomes a binary counter:

```
state 0   -> 00..00        state n-2 -> 00..10
state n-1 -> 00..01        ...
                           state 1   -> 11..11
```

State `i` has code `n-i`, and `i -> i-1` becomes `code -> code+1`. The chain
is `00..01 -> 00..10 -> ... -> 11..11 -> 00..00`, with a self-loop on
`00..00`. Flip-flop 0, the one driven by `T0`, is the least significant bit.
Under `eps` the T inputs are:

```
T'[0] = q[0] | q[1] | ... | q[NU-1]     (toggle unless the state is 00..00)
T'[k] = q[0] & ... & q[k-1]             (ripple carry, k >= 1)
```

Each flip-flop has a selector, `(eps & carry) | (~eps & T_orig)`. The OR
chain costs `NU-1` gates. The AND chain starts from `eps`, so it supplies the
`eps &` term of every selector. The total is `4*NU-1` two-input gates plus
one inverter. The state register needs no scan path, and the original logic
does not need to be known.

Output path: `out = eps ? beta : out_orig`. Under this code assignment,
`beta2` is the end of the OR chain (`any_q`) and `beta1` is `q[0]`, so
either costs a three-gate selector.

If the original machine uses D flip-flops, set `ORIG_FF = ORIG_D`
(`S4_ORIG_FF` on `ce_top`). The `t_orig` port then carries D inputs, and one
XOR per flip-flop (`T = D ^ Q`) converts them to T inputs in front of the
augmentation gates. That conversion is the only extra cost.

## The verifier (`verifier`, `f_register`)

There is one verifier per output. Every latch is sticky: once set, it stays
set until reset.

```
            +--> XOR <-- RV                    -> beta-latch  (output checks)
out_bit ----+
            +--> F-register --> Comparator <-- RR  -> alpha-latch (state checks)
eps --------^
```

* **Output checks (`beta`).** RV holds the output value expected from one
  transition. On a cycle with `beta_en = 1`, the beta-latch is set if
  `out_bit != RV`.
* **State checks (`alpha`).** While `eps = 1`, the F-register compacts
  `out_bit`.
  * `F_SYN`: number of ones.
  * `F_TC`: number of changes between consecutive bits.
  * `F_LFSR`: serial Galois signature, polynomial `POLY`, default
    `x^10+x^3+1`.

  On the first cycle with `eps = 0` after the burst, the comparator checks
  the F-register against RR (`cmp_fire`) and sets the alpha-latch on a
  mismatch (`cmp_mismatch`).
* **Framing.** The synchronising sequence and a distinguishing sequence are
  both runs of `eps`, and they may follow each other directly. Two rules
  frame them:
  * loading RR (`rr_load`) restarts the compaction on that cycle and arms
    the comparator;
  * an `eps` burst with no RR load is not compared.

  The source therefore loads RR on the first cycle of each distinguishing
  sequence. It may load RV during that sequence, for the output check that
  comes next.
* `f_value` is brought out, so the state can also be read directly.

The widths must hold the largest count: `n-1` for the single-output machine
(`S4_FW = NU`), `Q-1` per digit for the multiple-output machine. Counts wrap.

## Running a checking experiment

This is the experiment the end-to-end testbenches apply. It is one valid
ordering. Deriving transfer sequences for a real machine needs that
machine's state table. In the test machine, input 0 maps `s` to `s-1 mod n`,
so a transfer from state 0 to state `j` is input 0 applied `(n-j) mod n`
times.

1. **Synchronise.** Apply `eps` for `n-1` cycles (`Q-1` for the
   multiple-output machine).
2. **Identify every state `i`.** Transfer from 0 to `i`. Then apply the
   distinguishing sequence `eps**n` (`eps**Q`), with RR = the expected
   compaction of `i`.
3. **Check every transition.** For every state `j` and input `x`:
   1. transfer to `j`;
   2. apply `x` with `beta_en = 1`, with RV already holding `lambda(j,x)`;
   3. apply the distinguishing sequence, with RR = `delta(j,x)`.
4. **Read the result** one cycle after the last `eps`: `fail = OR` of all
   alpha- and beta-latches.

For `NU = 10` (`n = 1024`) and 32 input symbols, the experiment takes
51,921,408 clock cycles, about 5.2 s at 10 MHz. That is within the bound
`4n^2 + 1.5*m*n^2 + n = 54,526,976` for `m` input symbols. The closed form is
`(n-1) + (n(n-1)/2 + n^2) + m(n(n-1)/2 + n^2 + n) + 1`.

## Interfaces and timing

All blocks are clocked on the rising edge of `clk`, with an active-low
asynchronous reset `rst_n`. The reset clears the state to 0 and all latches
and registers. The method itself needs no reset, because the synchronising
sequence fixes the state.

| module         | key parameters (default)                                                    | timing |
|----------------|-----------------------------------------------------------------------------|--------|
| `ce_top`       | `NU=10`, `S4_BETA=BETA2_NONZERO`, `S4_F_KIND=F_SYN`, `S4_FW=NU`, `Q=3`, `L=2`, `A1_F_KIND=F_SYN`, `A1_FW=4` | see below |
| `gstar_sec4`   | `NU=10`, `BETA`, `ORIG_FF=ORIG_T`                                                        | one transition per edge; `out` is combinational (Mealy) |
| `eps_augment`  | `NU=10`                                                                    | combinational |
| `gstar_alg1`   | `Q=3`, `L=2`, `BETA`                                                       | one transition per edge; `out` is combinational |
| `eps_digit_fn` | `Q=3`, `L=2`, `BETA`                                                       | combinational |
| `verifier`     | `FW=10`, `F_KIND=F_SYN`, `POLY`                                            | compare one cycle after `eps` falls; latches update on the next edge |
| `f_register`   | `FW`, `KIND`, `POLY`                                                       | `start` loads the first bit; `en` appends |

`tff_bank` is a helper: the bank of T flip-flops. `ce_pkg` holds the enums
and the `beta_of` function.

`ce_top` ports starting with `s4_` belong to the single-output machine, and
those starting with `a1_` to the multiple-output machine. The original logic
of each machine is connected from outside:

* single-output machine: it receives `s4_q` and returns `s4_t_orig` and
  `s4_out_orig`;
* multiple-output machine: it receives `a1_state` and returns `a1_ns_orig`
  and `a1_out_orig`.

The experiment source drives `*_eps`, `*_beta_en`, `*_rv_load/_rv_in` and
`*_rr_load/_rr_in`.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
For example:

```
verilator --binary --timing --assert -Irtl rtl/ce_pkg.sv tb/ce_top_tb.sv --top-module ce_top_tb
./obj_dir/Vce_top_tb
```

The block testbenches are `tb/<module>_tb.sv`.

* `tb/ce_top_tb.sv`: runs complete experiments on a 6-flip-flop,
  8-input-symbol machine and on the `Q=3, L=2` machine. Each is run
  fault-free, with one wrong next state (alpha must fire), and with one
  wrong output (beta must fire). It counts every mechanism: `eps` chain step,
  wrap from `11..1` to `00..0`, hold at `00..0`, normal transition,
  comparison, output check, detection.
* `tb/ce_top_tc_tb.sv` and `tb/ce_top_lfsr_tb.sv`: run the same
  experiments on 5-flip-flop machines, one pairing `beta1` with
  transition-count compaction and one pairing `beta2` with an 8-bit LFSR
  signature. Each first checks that the compacted values of all states are
  distinct.
* `tb/ce_top_full_tb.sv`: leaves `ce_top` at its defaults and runs the full
  1024-state, 32-symbol experiment, about 52 M cycles and roughly 40 s in
  Verilator.

The behavioural original machines in these testbenches are pseudo-random
state tables with a guaranteed strongly connected input-0 cycle.

## Where this RTL goes beyond, or stops short of, the method

Choices made here that the method leaves open:

* RV and RR are loaded from outside. The method says only that RR
  generates reference data.
* When the latches sample, the RR-load framing rule, and combining all
  latches into one OR are all this design's choices.
* The exact definitions of the three compaction functions, the register
  widths, and the LFSR polynomial.
* The reset.
* `beta3` is given the same values as `beta2` (1 for a non-zero state or
  digit). The method lists it as a third output function but its values,
  as tabulated, coincide with `beta2`.
* The multiple-output machine is realised from its state table as a
  register plus selector. The method gives a gate-level modification only
  for the single-output case.

Not implemented:

* a second extra input that makes a machine strongly connected when it is
  not;
* the generation of the checking experiment from a state table
  (predecessor/successor tables).
