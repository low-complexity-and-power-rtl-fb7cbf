# Hybrid-rail register-less NCL Kogge-Stone adder

This is an 8-bit Kogge-Stone adder built as a clockless pipeline in NULL
convention logic (NCL). It has five stages. The design combines two ways of
making NCL cheaper:

* **Register-less pipeline.** A conventional NCL pipeline puts a register of
  TH22 gates and a full completion detector between each pair of logic blocks.
  In this pipeline every logic block is made of sleep-controlled (power-gated)
  gates that hold their own output. The block keeps its result until it is
  put to sleep, so the registers are not needed. Each stage has only one
  C-element and one OR gate for control.
* **Hybrid rail.** Only one chain of gates, the critical path, is built
  dual-rail and so shows when it has finished. All other gates are
  single-rail. They are correct as long as the one dual-rail gate of their
  stage is the last gate to finish. One OR gate on that gate's two rails
  detects completion for the whole stage.

The SystemVerilog models this behaviour at gate-function level with no delays.
Everything is level-sensitive: there is no clock anywhere.

## Signals: DATA, NULL, dual-rail and single-rail

A dual-rail bit is the pair `(D1, D0)`, written as the packed struct
`hrncl_pkg::dr_t` with `t = D1` and `f = D0`:

| (t, f) | meaning |
|--------|---------|
| (0, 0) | NULL: no value yet |
| (0, 1) | DATA0 |
| (1, 0) | DATA1 |
| (1, 1) | illegal (assertions in `rl_ctrl` check it never appears) |

Tokens move as alternating waves. A DATA wave carries a value. Then a NULL
wave returns every wire to 0.

A single-rail signal carries the plain value during DATA and is 0 during
NULL, like the output of a precharged domino gate. The 1-rail `t` of a
dual-rail bit is therefore also a valid single-rail copy of that bit. The
design uses it that way: for example, `g[0]` of stage 1 is `g0_dr.t`.

## How a stage sleeps and wakes

This is the part of the design that is easiest to get wrong, so it is given in
full. Stage `i` has a logic block `L_i` and a controller `rl_ctrl`:

* `ko[i] = crit[i].t | crit[i].f`. This is 1 while the critical output bit
  of stage `i` is DATA. All gates of a block start together and the critical
  gate finishes last, in both directions. So `ko[i]` stands for "the whole
  output of stage `i` is DATA" (1) or "the whole output is NULL" (0).
* `sleep_n[i] = C(ko[i-1], !ko[i+1])`. This is a C-element (TH22) with
  hysteresis. When `sleep_n = 1` the block evaluates. When `sleep_n = 0` it
  sleeps and all its outputs are NULL.

| `ko[i-1]` (input) | `ko[i+1]` (stage after) | `sleep_n[i]` | what happens |
|---|---|---|---|
| 1 (DATA) | 0 (NULL) | becomes 1 | wake and evaluate the new DATA |
| 1 (DATA) | 1 (DATA) | holds | wait: the stage after still holds the previous token |
| 0 (NULL) | 1 (DATA) | becomes 0 | sleep: the stage after has taken the DATA |
| 0 (NULL) | 0 (NULL) | holds | wait |

Stage `i` uses `ko[i+1]`, not `ko[i]`. So it cannot start the next wave until
the previous wave has reached the input of stage `i+2`. Without a register,
this is what stops a new wave from overwriting the one in front of it. As a
result, one stage with the opposite wave always separates two waves of the
same kind. The end-to-end test shows this: every stage wakes exactly once per
token.

A stage that has evaluated keeps its outputs while its own input goes back to
NULL. It clears them only when it goes to sleep. This holding takes the place
of the register. In the RTL, each stage's outputs are level-sensitive latches,
and the latches are written that way on purpose.

## The critical path: SLG, SLGL and S to D

The dual-rail chain is chosen by a simple rule. In each stage, take the gate
with the most inputs. Prefer one whose output feeds the chosen gate of the
next stage. Make it a *synchronization logic gate* (SLG), a dual-rail gate
that only produces DATA once its dual-rail inputs are DATA. Suppose no gate of
the next stage uses the SLG's output. Then the next stage's chosen gate becomes
an *SLG with latch* (SLGL). Its enable port is driven by the SLG before it, and
*single-rail to dual-rail converters* (S to D) in the stage before provide its
operands as dual-rail bits.

For the 8-bit adder this gives:

| stage | block | dual-rail gate | function |
|---|---|---|---|
| 1 | `ksa_pre` | SLG (3 inputs) | `G[0] = maj(a0, b0, cin)` |
| 2 | `ksa_prefix`, distance 1 | SLG | `G[1] = g1 \| p1 & G[0]` |
| 3 | `ksa_prefix`, distance 2 | SLG | `G[3] = G'[3] \| P'[3] & G[1]` |
| 4 | `ksa_prefix`, distance 4 | SLG, plus S to D of `G[6]` and `p7` | `G[7] = cout` |
| 5 | `ksa_sum` | SLGL, enabled by `G[7]` | `s7 = p7 ^ G[6]` |

In general, prefix level `l` (distance `2^l`) has its SLG at bit `2^(l+1) - 1`,
and that gate's low operand is the previous SLG. The only dual-rail inputs of
the adder are `a0`, `b0` and `cin`, and the only dual-rail outputs are the sum
MSB `s_msb` and the carry out `cout`. `cout` leaves through an MTNCL buffer: a
pure wire cannot sleep, so it is buffered by a gate that can.

## Stage equations

The carry input is folded into bit 0, so `G[k]` after the last prefix level is
the carry out of bit `k`.

* Stage 1: `g[k] = a[k] & b[k]` for k >= 1, `g[0] = maj(a0, b0, cin)`,
  `p[k] = a[k] ^ b[k]`. `cin` is also buffered onward.
* Prefix level with distance `s`: for `j >= s`, `G'[j] = G[j] | P[j] & G[j-s]`
  and `P'[j] = P[j] & P[j-s]`. Smaller `j` are buffered. The per-bit
  propagate `pp` and `cin` are buffered through for the last stage.
* Last stage: `sum[0] = pp[0] ^ cin`, `sum[k] = pp[k] ^ G[k-1]`, and
  `cout = G[W-1]`.

The width is the parameter `W` of `hr_rlncl_ksa` (default 8). It must be a
power of two, at least 4. The pipeline has `log2(W) + 2` stages.

## Interface of `hr_rlncl_ksa`

| port | dir | width | meaning |
|---|---|---|---|
| `rst` | in | 1 | active high. All stages sleep. Hold the inputs NULL and `ko_next` low while it is high. |
| `a_hi`, `b_hi` | in | W-1 | operand bits W-1..1, single-rail |
| `a0`, `b0`, `cin` | in | dr_t | operand bit 0 and carry in, dual-rail |
| `ko_in_ack` | out | 1 | `ko` of stage 1: 1 when it has taken the DATA, 0 when it has taken the NULL |
| `sum` | out | W | sum, single-rail view (MSB = `s_msb.t`) |
| `s_msb`, `cout` | out | dr_t | sum MSB and carry out, dual-rail |
| `ko_out` | out | 1 | `ko` of the last stage: the output is DATA |
| `ko_next` | in | 1 | from the consumer: 1 while it holds the DATA token, 0 once it has seen NULL |
| `sleep_n_o` | out | log2(W)+2 | sleep control of every stage, for observation |
| `ko_o` | out | log2(W)+3 | `ko` of the input (bit 0) and of every stage |

Producer protocol:

1. Present DATA on all input bits. The single-rail bits must be valid no later
   than the dual-rail ones.
2. Wait for `ko_in_ack = 1`.
3. Present NULL (all zero).
4. Wait for `ko_in_ack = 0`.

The completion of the input wave (`ko[0]`) comes from an `ncl_cd` over the
three dual-rail input bits.

Consumer protocol:

1. Wait for `ko_out = 1`.
2. Read `sum` and `cout`.
3. Raise `ko_next`.
4. Wait for `ko_out = 0`.
5. Lower `ko_next`.

## Modules

| file | contents |
|---|---|
| `rtl/hrncl_pkg.sv` | `dr_t`, `DR_NULL`, and the functions of the dual-rail gates (SLG, SLGL, S to D) |
| `rtl/th_gate.sv` | NCL threshold gate THmn with hysteresis (TH12, TH13, TH22, TH23, TH33, ...) |
| `rtl/ncl_cd.sv` | n-bit completion detector: n TH12 and one THnn |
| `rtl/rl_ctrl.sv` | per-stage control: OR completion and sleep C-element |
| `rtl/ksa_pre.sv` | stage 1, generate/propagate |
| `rtl/ksa_prefix.sv` | one Kogge-Stone prefix level (parameters `SPAN`, `LAST`) |
| `rtl/ksa_sum.sv` | last stage, sum and carry out |
| `rtl/hr_rlncl_ksa.sv` | the top: the pipeline and its controllers |

## How the model treats timing, and how far to trust it

* **No delays.** Every transition happens in the same time step as the
  environment event that causes it. The model checks function and handshake
  order. It says nothing about speed, power or area.
* **Stage-atomic evaluation.** The hybrid-rail scheme depends on a timing
  rule: the single-rail gates of a stage finish before its dual-rail gate.
  Without delays, that rule is modelled by evaluating all gates of a stage in
  one latch process. When the stage's dual-rail inputs are DATA and the stage
  is awake, every output of the stage takes its new value at once, and the
  outputs hold from then until sleep. The real circuit must meet this rule
  through sizing and placement, and the RTL cannot check it.
* **Gate level where it matters.** The threshold gates, the completion
  detector and the sleep C-elements are real gate instances. The logic blocks
  are written at equation level. Their SLG, SLGL and S to D gates are package
  functions that reproduce the dual-rail behaviour: NULL until every
  dual-rail input is DATA. They are not transistor networks.
* **Latches and loops are intended.** Lint and synthesis report latches (the
  hysteresis of the threshold gates and the stages' held outputs) and
  combinational loops through the handshake ring. A clockless handshake
  circuit is built from exactly these.
* **Power gating** is modelled only as its logical effect: a sleeping block's
  outputs are NULL. Multi-threshold transistors and leakage are outside RTL.

## Choices this RTL makes that the design description leaves open

* The five stages are split as generate/propagate, three prefix levels and
  sum.
* A carry input is added and folded into bit 0, and the carry output is
  brought out.
* The SLG chain is fixed as given in the critical-path table above.
* There is a reset, and a producer/consumer protocol at the two ends.
* `ko` means "DATA present". The sleep C-element takes `ko` of the stage
  before and the complement of `ko` of the stage after. Written that way, the
  wake and sleep conditions are exactly the ones described for the pipeline.
* The S to D converters give DATA only while their stage evaluates. The SLGL
  waits for its enable and both operands, then holds until sleep.

## Not included

* The conventional NCL pipeline with registers, the all-dual-rail
  register-less adder and the XNOR example block. They are comparison
  baselines and background, not part of this design.
* Transistor-level MTCMOS gates and any FPGA or ASIC implementation
  results.

## Simulating

Each testbench drives its block, compares it with values it computes itself,
and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/hrncl_pkg.sv tb/tb_hr_rlncl_ksa.sv --top-module tb_hr_rlncl_ksa
./obj_dir/Vtb_hr_rlncl_ksa
```

Replace the testbench name to run another one (`tb_th_gate`, `tb_ncl_cd`,
`tb_rl_ctrl`, `tb_ksa_pre`, `tb_ksa_prefix`, `tb_ksa_sum`).
`-Wno-fatal` is needed because Verilator warns, correctly, about the intended
latches and handshake loops.

`tb_hr_rlncl_ksa` runs the top at its default size (8 bits, 5 stages). It
sends 300 additions. The first ones are corner cases (`FF+00+1`, `FF+FF+1`,
`00+00`, `80+80`) and the rest are random,
with random producer gaps and a consumer that is sometimes slow. It checks
every sum and carry, checks that every NULL wave clears the outputs, and
checks that each stage wakes exactly once per token. It also counts, and
requires at least once, each of these mechanisms:

* a stage waiting because the stage after it still holds the previous token
* a stage holding DATA after its input returned to NULL
* back-pressure from the consumer
* two tokens in flight at once
* carry out
* carry in

`tb_hr_rlncl_ksa_w16` runs the same test on a 16-bit, 6-stage instance.
Every test also checks that no stage's critical bit goes from one DATA value
to another without a NULL in between.

The stage testbenches check NULL during sleep, that no evaluation starts
before the dual-rail inputs are DATA, that outputs hold after the input goes
NULL, and the equations of their stage. The gate testbenches check the
hysteresis rule of all five basic threshold gates and the rise and fall of
the completion detector.
