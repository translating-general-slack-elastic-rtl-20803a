# Slack-elastic dataflow circuits for programs that use a channel more than once

A static dataflow circuit is a network of small elements (MERGE, SPLIT, COPY,
FUNC, BUF, ...) that pass tokens over handshake channels. Translation methods
that turn a message-passing program into such a network need each channel to
be used at most once per loop iteration. Real programs break this rule. A
packet router reads a header from a channel and then reads more words from the
same channel. A program that shares one hardware unit sends to it, and reads
from it, at several points.

The usual fix adds a MIXER, an element that forwards whichever input arrives
first. A MIXER's result depends on arrival order, so you can no longer add
buffering freely. A shared unit that keeps state can also be reached in the
wrong order.

This RTL takes a different approach and never uses a MIXER:

1. Every use of the channel gets its own **replica** channel. The program
   becomes legal for dataflow translation.
2. The replicas are joined with deterministic elements: a **MERGE** for an
   output channel, a **SPLIT** for an input channel. Each needs a stream of
   control tokens (**CTRL**) naming the replica that the next token belongs
   to.
3. The CTRL stream is computed at run time by small deterministic processes,
   built bottom-up over the program's structure. Each program fragment has a
   one-bit **access sequence**: one `1` per use of the channel, then a `0`
   when that run of the fragment ends. Sequential composition (SEQ), selection
   (IF0/IF1, SEL) and loops (LOOP_C) each turn their parts' access sequences
   into the sequence of the whole. SEQ and SEL also emit CTRL.

The circuit is deterministic and slack elastic: buffering added on any channel
changes only timing, never results. The control side may run ahead of the
data as far as its buffers allow.

## The access-sequence processes

Each process below is a small state machine. The text after each name is the
behaviour it implements, in the guarded-command notation of CSP/CHP (`?`
receive, `!` send, `*[...]` repeat, `[g -> ... [] else -> ...]` select). All
streams are one bit wide.

**Base replica** (`acc_base`). A replica used once per run of its statement
has the access sequence `1,0,1,0,...`, written `s := 1; *[S!s; s := 1-s]`. It
is built from library elements only: a ring holding one token, made of
`INIT(1) -> COPY -> FUNC(not) -> INIT`, with the other COPY output as the
stream. With `INIT_BIT = 0` it gives `0,1,0,1,...`. That is the CTRL stream
for the simplest case, `*[L?x; A!x; L?x; B!x]`.

**SEQ** (`seq_ctrl`, fragment A then fragment B). It reads SA until it sees
A's `0`, then SB until it sees B's `0`. For each `1` it sends on C which
fragment the access belongs to (0 for A, 1 for B), and it forwards the `1` on
S. It drops A's closing `0` and forwards B's. If A makes *a* accesses and B
makes *b*, one run gives `C = 0^a 1^b` and `S = 1^(a+b) 0`. Example: with
base sequences on both inputs, `C = 0,1` and `S = 1,1,0`.

**IF0 / IF1** (`if_ctrl`, a selection `[g = 0 -> A [] else -> B]` where only
one branch uses the channel). The program sends the guard on G. If the branch
with the replica is taken, the block forwards that branch's access sequence up
to its `0`. Otherwise it sends a single `0`. No CTRL is needed. `USED_BRANCH`
chooses which guard value leads to the replica: 0 gives IF0, 1 gives IF1.

**SEL** (`sel_ctrl`, both branches use the channel). It forwards the taken
branch's sequence and sends the guard value on C for every `1`. The SEL in
the first example below is fed guards `0,1,1`, base sequences on SA and
`1,1,0` runs on SB. It produces `S = 1,0, 1,1,0, 1,1,0` and `C = 0,1,1,1,1`.

**LOOP_C** (`loop_ctrl`, `*[g -> A]`). The program reports the loop guard
once before the first trip and once after every trip. While the guard is 1,
the block forwards the body's `1`s and drops the `0` that ends each trip. When
the guard is 0, it sends one `0`. Three trips over the SEL output above give
`1,1,1,1,1,0`. A loop that never runs gives just `0`.

**Guard merge** (`guard_merge`). After the guard sends are added, the program
sends the loop guard from two places: before the loop (G0) and at the end of
the body (G1). This block merges them in program order, `s := 0;
*[[!s -> G0?s [] s -> G1?s]; G!s]`. A `0` (loop exit) means the next guard
comes from G0, and a `1` means it comes from G1.

The IF, SEL and LOOP_C blocks latch a guard token as soon as they need one.
The guard channel therefore never waits for an access sequence to arrive.

## The example systems

`slack_elastic_top` places four independent systems side by side, each with
its own ports.

**`fig6_system`: one input channel read four times.** The program is

```
res := 0;
*[ A0?a0;
   *[ a0 < 10 -> B?b0;
      [ b0 = 0 -> A1?a1; res := res + a1
      [] else  -> A2?a2; A3?a3; res := res + a2 + a3 ];
      a0 := a0 + 1 ];
   RES!res ]
```

`fig6_ctrl` builds the control for channel A in five steps:

1. Base sequences B0 to B3, one per replica.
2. `SEQ(B2, B3)` gives `C0` and `S0`. `SPLIT(C0)` divides A23 into A2 and A3.
3. `SEL(b0 guard, B1, S0)` gives `C1` and `S1`. `SPLIT(C1)` divides A123 into
   A1 and A23.
4. `LOOP_C(loop guard, S1)` gives `S2`.
5. `SEQ(B0, S2)` gives `C2` and `S3`. `SPLIT(C2)` divides the outside channel
   A into A0 and A123. S3 goes to a SINK.

`example_prog` is the program with A renamed to replicas. It also sends
`G!(b0 != 0)` before the selection, and `G0!(a0 < 10)` and `G1!(a0 < 10)` for
the loop.

**`ex1_system`: a stateful unit shared by three call sites in sequence.**
`FMADD` computes `sum := a*b + sum; O!sum` and clears `sum` after every third
access. Its result depends on the order of calls. Call sites 0, 1 and 2 each
have their own input replica (an `{a,b}` pair) and output replica. The control
is `SEQ(SEQ(B0,B1),B2)`. Its two CTRL streams are each copied to a MERGE tree
(call sites into the unit) and a SPLIT tree (unit back to the call sites). A
three-input FUNC computes `c0 + c1 + c2`. The operands of call site 2 often
arrive before those of call site 0. The unit still sees call site 0 first, so
`sum` is always 0 at that point. An arrival-order MIXER would not guarantee
that.

**`ex2_system`: the same unit under guards.**

```
[g0 -> c0 := FMADD(a0,b0) [] else -> c0 := a0];
[g1 -> c1 := c0           [] else -> c1 := 2*c0];
[g2 -> c2 := FMADD(c1,c1) [] else -> c2 := c1]
```

Each call site's access sequence comes from an IF1 on its guard. A SEQ joins
the two. The middle selection has no access, so it takes no part in the
control: the unit's schedule depends only on g0 and g2. `ex2_program` is the
program side. It takes `{g2,g1,g0,a0,b0}` as one input token and returns
`c2`.

**`ex3_system`: a call site inside a loop inside a selection.**

```
[g0 -> c0 := FMADD(a0,b0) [] else -> c0 := a0];
[g1 -> *[g2 -> c1 := FMADD(c0,c0)] [] else -> c1 := FUNC(c0)];
RES!c1
```

The control is `SEQ(IF1(g0, B0), IF1(g1, LOOP_C(g2, B1)))`. Here the program
side is also built from dataflow elements, so that iterations can overlap:

- A SPLIT and a MERGE on g0 either send `(a0,b0)` through the unit or pass
  `a0` straight on.
- A SPLIT on g1 sends `c0` either to FUNC or to `ex3_loop`. That small
  process passes each `g2` to LOOP_C and calls the unit once per trip.
- A MERGE on g1 puts the results back in program order.

Nothing limits how many tokens are in flight. So while the loop of one
iteration is still calling the unit, a later iteration with `g0 = g1 = 0`
already passes through FUNC. FUNC is not specified by the example; here it is
the bitwise inverse. `g0`, `g1`, `(a0,b0)` and the `g2` stream arrive on
separate channels. `c1 = c0` when the loop makes no trip.

## The element library and its timing

All channels use a synchronous valid/ready/data handshake. A token moves on a
rising edge where valid and ready are both high. A producer holds valid and
data steady until then. Reset is synchronous and active high. It empties
every buffer and gives each process's state variables the initial values its
CHP sets.

| module | element | behaviour |
|---|---|---|
| `df_merge` | MERGE | control token `i` takes the next token from input `i` |
| `df_split` | SPLIT | control token `i` sends the data token to output `i` |
| `df_copy` | COPY | each input token goes to all outputs |
| `df_func` | FUNC | one token from every input, then `f` of them (`FN_ADD` sum, `FN_NOT`) |
| `df_sink` | SINK | always ready; also counts tokens |
| `df_buf` | BUF | two-place FIFO buffer |
| `df_init` | INIT | a BUF that holds one constant token after reset |
| `df_slack` | BUF chain | `DEPTH` BUFs in series, used to add slack |

Every element and process writes its outputs into its own `df_buf`. Three
things follow:

- Latency is one cycle per element.
- Each element can move a token every cycle. The exception is `acc_base`,
  whose ring produces one token every three cycles.
- No `ready` signal passes combinationally through an element, so rings of
  elements (like the one in `acc_base`) and the loop between a program and its
  control circuit have no combinational loops.

The buffers hold two tokens where the CHP BUF holds one. Slack elasticity
makes that difference invisible in the results.

An element fires when every token it needs is present and every output it
writes has room. It only waits for room on the outputs it actually writes in
that step. For example, SEQ skipping A's closing `0` does not wait for room on
S.

Wide MERGEs and SPLITs are built as trees of two-way elements, as in
`ex1_system`. Because every stage is buffered, a tree keeps the rate of a
single element. A four-way tree of two-way MERGEs delivers one token per
cycle, as a single two-way MERGE does, with one more cycle of latency.

The program sides `example_prog`, `ex2_program` and `ex3_loop` are
sequential state machines that do one receive, send or assignment per cycle.
A full design would also translate them into dataflow, and they stand in for
that translation. `ex3_system` shows what such a translation looks like
around its selections.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `W` | systems, elements | 32 | data width. All arithmetic is unsigned and wraps. |
| `CTRL_SLACK` | `slack_elastic_top`, `fig6_*`, `ex1_system` | 1 | extra BUF stages on every CTRL channel (0 allowed) |
| `USED_BRANCH` | `if_ctrl` | 0 | 0: IF0, 1: IF1 |
| `INIT_BIT` | `acc_base` | 1 | first token of the alternating stream |
| `N`, `NIN`, `OP` | MERGE/SPLIT/COPY, FUNC | 2, 2, `FN_ADD` | fan-in or fan-out, and function |

## Where this RTL departs from or adds to the method

- The method targets asynchronous circuits. This is a clocked valid/ready
  rendering of the same token behaviour, so it says nothing about asynchronous
  timing or throughput in nanoseconds.
- The control processes SEQ, IF0/IF1, SEL, LOOP_C and the guard merge are
  each written as one small state machine. The method instead translates each
  of them into a network of dataflow elements, as is done here only for the
  base sequence. The tokens they exchange are the same. A translated process
  could run faster because it is pipelined.
- FMADD uses W-bit unsigned integers with a wrapping product. The name
  suggests floating point; that is not implemented.
- FUNC supports only the two functions the examples need.
- SINK has an extra token-count output.
- In `ex1_system`, `ex2_system` and `ex3_system`, the input and output channels of the
  shared unit have the same control structure. One control circuit is built
  and its CTRL stream is copied to both. The method builds one per channel,
  which yields the same tokens.
- The `...` parts of the example programs are replaced by the input and output
  tokens described above.
- In `fig6_system`, the SINK count includes tokens the control circuit
  produced ahead of time. It counts one per access of A, one per outer
  iteration, and the `1` that announces the next iteration's first access.
  In `ex1_system`, whose control needs no guards, the control runs ahead until
  its buffers are full.
- There is no SOURCE element: none of the circuits needs one.
- The method is presented against a MIXER-based approach, which lets only
  one control token into the control circuit at a time. That approach is not
  built, so the speed-ups it is compared with cannot be measured here. The
  tests show the behaviour that causes them instead: in EXAMPLE_1 operands
  arrive early, in EXAMPLE_2 a call site that is skipped never holds up the
  unit, and in EXAMPLE_3 FUNC works in parallel with the loop.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each ends with
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The helpers
`tb/tb_src.sv` and `tb/tb_snk.sv` offer tokens with random gaps (and check that
an offered token stays stable) and accept tokens with random backpressure.

The reference models work per iteration and are written independently of the
RTL. For example, SEQ must give `0^a 1^b` and `1^(a+b) 0`. The worked
sequences of the method are checked literally: SEQ gives `0,1` / `1,1,0`, SEL gives
`1,0,1,1,0,1,1,0` / `0,1,1,1,1`, and LOOP_C gives `1,1,1,1,1,0`. Element
latency and throughput are checked for BUF, the slack chain, FMADD, and the
three-cycle spacing of `acc_base`. `tb_fig6_system` and `tb_ex1_system` take a
`CTRL_SLACK` parameter. They pass with 0, 1 and 3 or 4 extra stages: the
results do not depend on slack. `tb/tb_alt_split.sv` builds the smallest
case, `*[L?x; A!x; L?x; B!x]`. It uses an `acc_base` with `INIT_BIT = 0` as
the CTRL of a SPLIT, and checks that A gets the even tokens of L and B the
odd ones. `tb/tb_merge_tree.sv` checks that a
four-way tree of two-way MERGEs delivers the tokens its control names, at
one per cycle, with one cycle more latency than a single MERGE.

`tb/tb_slack_elastic_top.sv` runs all four systems at once at the default
parameters: 60 outer iterations, 100 EXAMPLE_1 iterations, and 150 iterations
each of EXAMPLE_2 and EXAMPLE_3. It counts each mechanism and fails if any never happened:

- a loop with zero trips and a loop with several trips;
- both selection branches;
- CTRL waiting at the A splitter before its data;
- stalls and backpressure;
- EXAMPLE_1 operands arriving out of program order;
- the unit's `sum` restarting;
- all four guard combinations of EXAMPLE_2;
- in EXAMPLE_3, loops with no trips and with several trips;
- in EXAMPLE_3, FUNC firing while the loop of an earlier iteration is still
  running.

## Simulating

With Verilator 5 (packages first, the RTL and testbench folders as search
paths):

```
verilator --binary --timing --assert -Irtl -Itb rtl/df_pkg.sv \
    tb/tb_slack_elastic_top.sv --top-module tb_slack_elastic_top -o sim
./obj_dir/sim
```

To test one block, replace the testbench with `tb/tb_<module>.sv`. Parameters
of a testbench can be set with `-G`, for example `-GCTRL_SLACK=0` for
`tb_fig6_system`. Lint the RTL with `verilator --lint-only -Wall -Irtl
rtl/df_pkg.sv rtl/<module>.sv`.

To build control for a different program, wire the processes above in the
same way as the program's structure: one `acc_base` per use of the channel,
then SEQ for `;`, IF0/IF1 or SEL for selections, and LOOP_C (with a
`guard_merge`) for loops. Join the replicas with `df_merge` or `df_split`
trees driven by the CTRL outputs, and end in a `df_sink`. The program side
must send each selection's and loop's guard.
