# Static islands with input offsets in a dynamically scheduled circuit

A dynamically scheduled (dataflow) circuit moves every value as a token
with a valid/ready handshake. It copes well with irregular control flow,
but every operator pays for its handshake logic. A *static island* is a
part of such a circuit that has no irregular behaviour. It is built as an
ordinary fixed-schedule pipeline with a single clock enable, and a
wrapper joins it to the handshakes around it.

The usual wrapper waits until **all** of the island's inputs are present
before it starts an iteration. That hurts when an input is used only
late in the island's schedule and is produced by the island's own
previous iteration. Take the example island

    x = ((0.9 + a) * 0.7 + 0.3) * b

built from a 4-cycle adder and a 5-cycle multiplier. `a` is used in
cycle 0, but `b` is needed only in cycle 13 (4 + 5 + 4), and `x` appears
in cycle 18. Put this island in a loop where each `x` becomes the next
`b`:

* A wrapper that waits for both inputs starts one iteration every
  18 cycles.
* A wrapper that knows `b`'s **offset** of 13 can start the next
  iteration as soon as `a` is there and ask for `b` 13 cycles later. The
  loop then runs at one iteration every 18 − 13 = **5** cycles.

This repository holds that offset-aware wrapper, two islands, the
dataflow components around them, two complete loops that use them, and
a third loop that is a static island on its own and reaches its arrays
through memory ports.

## Offsets, latency and the start interval

Three numbers describe an island:

* **Offset of an input**: cycles from the start of an iteration to the
  first use of that input.
* **Latency of the output**: cycles from the start of an iteration to its
  result.
* **II** (initiation interval): the number of clock-enabled cycles
  between start slots. The wrapper offers a start slot every II cycles.

When the output feeds an input back D iterations later, iteration *k*
needs the result of iteration *k − D* at time `k·II + offset`. That
result exists at `(k − D)·II + latency`. So the loop keeps running only if

    II ≥ (latency − offset) / D

If II is smaller, the island waits for an input that only its own stalled
pipeline can produce, and it deadlocks. `offset_wrapper` itself does not
enforce this. Each loop module sets its II to the smallest value that
meets the rule and rejects a smaller one at elaboration. The wrapper
testbench also runs II = 4 on the example island and checks that it does
lock up.

| island | offset-0 input | late input, offset | latency | D | minimum II |
|---|---|---|---|---|---|
| `fig5_island` | a | b, 13 | 18 | 1 | 5 |
| `vnt_island_shared` (default) | d | weight, 21 | 30 | 1 | 9 |
| `vnt_island` | d | weight, 18 | 27 | 1 | 9 |

## The offset wrapper (`offset_wrapper`)

The wrapper stores no data. The island's pipeline holds every value in
flight, and the wrapper decides when that pipeline may advance. It drives
a single signal for this, the island clock enable `ce`. It has three
parts.

1. **Zero-offset input `a`.** A phase counter, advanced by `ce`, marks a
   start slot every II enabled cycles. In a slot, `a_ready` is high:
   * If `a` is valid, it is taken and an iteration starts.
   * If not, the slot passes as a **bubble**. The pipeline still
     advances, so earlier iterations keep moving.
2. **Late inputs `b[0..NB-1]`.** `offset_shift_register` holds one bit
   per pipeline stage and shifts with `ce`. Bit *k* is set when the
   iteration started *k* enabled cycles ago is live. When bit
   `B_OFFSET[i]` is set, `b_ready[i]` is high. If `b[i]` is not valid
   then, `ce` drops and the **whole island stalls**, older iterations
   included, until it arrives. Both islands here have one late input
   (`NB = 1`). The testbench also runs a wrapper with two late inputs,
   at offsets 5 and 13.
3. **Result and stalls.** The bit at `LATENCY` marks a result at the
   island's output, and it drives `x_valid`. The enable is

       ce = mem_ce && (!x_valid || x_ready) && no required b[i] is missing

   So backpressure on `x`, a missing `b`, or a low `mem_ce` (the enable
   from a memory arbiter) all freeze the island. A result can be accepted
   in a cycle where `ce` is low for another reason. The `sent` flag
   records this so the same result is not offered twice.

Timing: `a_ready` and `b_ready` depend combinationally on `b_valid`,
`x_ready` and `mem_ce`. `x_valid` comes from registers. `x_data` is a
wire from the island's output. An assertion checks that an offered
result stays, unchanged, until it is taken. The `start`, `bubble` and
`b_stall` outputs exist only for observation.

## The islands

Both islands are plain pipelines with a clock enable and no handshake.
They use `fp_add` and `fp_mul`, which are IEEE-754 binary32 operators:

* Rounding is round-to-nearest-even.
* Subnormals are flushed to zero.
* Every NaN becomes the quiet NaN `7FC00000`.
* The latencies (4 and 5) are parameters. Each operator computes its
  result in one combinational block in front of its first register. The
  remaining registers only delay it, and a synthesis tool may retime them
  into the logic.

**`fig5_island`** is `x = ((0.9 + a) * 0.7 + 0.3) * b`, with the four
operators in a chain.

The vector normalisation kernel's first loop has this island body:

    weight' = ((d*d + 19.5)*d + 3.7)*d + 0.73*weight

It comes in two versions with the same function.

**`vnt_island`** uses one operator per operation. The schedule is as soon
as possible:

* d·d starts at cycle 0, and +19.5 at cycle 5.
* ·d at cycle 9, and +3.7 at cycle 14.
* ·d and weight·0.73 both start at cycle 18.
* The final sum is ready at cycle 27.

So weight has offset 18. `d` is kept for its later uses in a delay line
that is enabled by `ce`. The product 0.73·weight is deliberately
scheduled late, so that weight is needed as late as possible.

**`vnt_island_shared`** (the default in the loop) runs all seven
operations on **one multiplier and one adder**. The loop can start an
iteration only every 9 cycles anyway, so separate operators would mostly
sit idle. A slot counter (0–8) advances with `ce` and is cleared by
reset, so it stays in step with the wrapper's start slots. Each operator
input is a multiplexer selected by the slot:

| slot | multiplier | adder | held |
|---|---|---|---|
| 0 | d·d | | adder result → h1 |
| 1 | h1·d (d from 10 cycles back) | | adder result → h2 |
| 2 | h2·d (d from 20 cycles back) | | |
| 3 | weight·0.73 | | |
| 5 | | product + 19.5 | |
| 6 | | product + 3.7 | |
| 7 | | | product → h3 |
| 8 | | h3 + weight·0.73 | |

Every operation of every iteration lands on a slot that no other
operation uses, so the operators never conflict. Two operations wait one
cycle for their slot, which makes weight's offset 21 and the latency 30.
Since 30 − 21 = 9, the loop interval does not change. Synthesised, the
shared island is about a third of the size of the unshared one. The
schedule assumes `ADD_LAT ≥ 4` and an interval of exactly
`ADD_LAT + MUL_LAT`, and both are checked at elaboration.

## Dataflow components

These are valid/ready components of the kind a dynamic-scheduling
compiler instantiates.

* **`elastic_merge`**: passes on a token from any input that has one.
  When several inputs have one, the lowest-numbered input wins.
* **`elastic_mux`**: a select token picks which input goes through. The
  select token and the chosen data are consumed together.
* **`elastic_branch`**: a condition token sends the data token to `out_t`
  (condition 1) or to `out_f` (condition 0).
* **`elastic_buffer`**: a FIFO, default depth 2, with two modes:
  * transparent: an empty buffer passes a token through in the same
    cycle;
  * opaque: a token always waits at least one cycle, which cuts the
    valid path.

  `in_ready` is registered in both modes.
* **`elastic_fork`** (helper): an eager fork. Each output is delivered
  independently, and the input is released when all outputs have
  delivered.

Merge, mux and branch are combinational. Buffer and fork have a
synchronous, active-high reset.

## The loops

**`fig5_loop`** runs a stream `a_0 … a_{n−1}`, ended by `a_last`, through
the recurrence

    b_0 = init,   b_{k+1} = x_k = ((0.9 + a_k)·0.7 + 0.3)·b_k

and returns the last `x`. The `a` stream is forked three ways:

* to the wrapper;
* to a select FIFO, whose entry is 0 on the first element of a loop;
* to a condition FIFO, whose entry is 1 unless the element is the last.

A mux chooses `init` or the fed-back value as `b`. A branch after the
island either sends `x` round the back-edge buffer or returns it on
`res`. II = 5.

**`vnt_loop0`** runs

    for each d: if (d < 1.0) weight = ((d*d + 19.5)*d + 3.7)*d + 0.73*weight

The `if` stays dynamic:

* A branch on `d < 1.0` sends `d` to the island, or discards it.
* A second branch, driven by a FIFO of the same conditions, sends the
  weight into the island or round an opaque buffer: the empty arm of the
  `if`.
* A merge joins the two arms.
* An exit branch and a loop-head mux close the loop.

So iterations with `d ≥ 1.0` cost no island time. A new `init` is
admitted only after the previous loop's result has left. This keeps one
weight token in the loop, so the merge never sees two at once. II = 9.

**`vnt_loop1`** is the kernel's second loop,

    for (i = 0; i < N - 4; i++)  r[i + 4] = r[i] + a[i] / w

built as one static island with no handshakes inside. It starts when
`w` (the weight from the first loop) is taken and raises `done` after
the last write. Each iteration reads `a[i]`, divides it by `w` (10-cycle
divider), reads `r[i]` just as the quotient appears, adds, and writes
`r[i + 4]` 15 cycles after it started. Iteration `i + 4` reads that word
`4·II` cycles later at the same point of its own schedule, so the write
must come at least one cycle earlier: `4·II ≥ ADD_LAT + 2`, which gives
II = 2 for the 4-cycle adder. The fixed schedule is what makes the
memory dependence safe; a dynamically scheduled version would need a
load-store queue. The arrays sit outside, behind plain memory ports (one
cycle read latency, write at the clock edge); every memory enable is the
island's clock enable, so a low `mem_ce` freezes the read ports as well.
With `N = 16` a loop takes 40 cycles from `w` to `done`.

**`static_islands_top`** places the three loops side by side, sharing
clock, reset and `mem_ce`. Its ports are the loops' ports, prefixed
`f5_`, `vnt_` and `vnt1_`. The loops are not chained to each other: the
weight from `vnt_loop0` and the arrays for `vnt_loop1` come from
outside. Each stream is a valid/ready channel of binary32 values with
a `last` flag. Each loop takes one `init` token and returns one `res`
token.

Measured at the default parameters, from the first island start to the
result, with no stalls:

| loop | length | cycles | formula |
|---|---|---|---|
| example loop | 40 iterations | 213 | 5·39 + 18 |
| vector normalisation loop | 20 values, all < 1.0 | 201 | 9·19 + 30 |
| second loop (`w` to `done`) | 12 iterations | 40 | 2·11 + 10 + 4 + 4 |

The same example loop would take 40·18 = 720 cycles under a wrapper that
waits for all inputs.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fp_add`, `fp_mul`, `fp_div` | `LATENCY` | 4 / 5 / 10 | pipeline depth |
| `vnt_loop1` | `N`, `DIV_LAT`, `II` | 16, 10, 2 | array length, divider latency, start interval |
| islands, loops, top | `ADD_LAT`, `MUL_LAT` | 4, 5 | operator latencies |
| `offset_wrapper` | `LATENCY`, `B_OFFSET`, `II` | 18, 13, 1 | island description and start interval |
| `offset_shift_register` | `DEPTH` | 18 | number of stages tracked |
| `fig5_loop` / `vnt_loop0` | `II` | 5 / 9 | start interval, derived from the latencies |
| loops | `TOK_DEPTH`, `FB_DEPTH` | 8, 2 | control-token FIFO and back-edge buffer depths |
| `vnt_loop0` | `SHARE_OPS` | 1 | 1: shared-operator island, 0: one operator per operation |
| `offset_wrapper` | `NB` | 1 | number of late inputs; `B_OFFSET` packs one 16-bit offset per input |
| `static_islands_top` | `F5_II`, `VNT_II`, `VNT1_II` | 5, 9, 2 | start intervals of the three loops |
| `static_islands_top` | `DIV_LAT`, `N` | 10, 16 | passed to `vnt_loop1` |

## Simulation

Each module `m` has a self-checking testbench `tb/tb_m.sv`. It prints
`TB_RESULT checks=… failures=…` and has a watchdog. The reference values
come from `tb/tb_f32_pkg.sv`, which recomputes each binary32 operation in
double precision and rounds once. That rounding is exact for a single add
multiply or divide. To run the end-to-end test at the default parameters:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/si_pkg.sv tb/tb_f32_pkg.sv tb/tb_static_islands_top.sv \
        --top-module tb_static_islands_top -o sim
    ./obj_dir/sim

For another block, replace the testbench file and the top-module name. `tb_vnt_loop0_separate` runs the vector normalisation loop with
the unshared island (`SHARE_OPS = 0`).

The loop testbenches drive random gaps on every input, on `res_ready` and
on `mem_ce`. They count each mechanism and fail if any of them never
happens:

* bubbles;
* stalls waiting for the late input;
* backpressure;
* memory-enable stalls;
* the mux taking initial values and fed-back values;
* iterations that bypass the island.

For the second loop the testbenches hold `a[]` and `r[]` in memory
models, compare every `r` word after each loop (including the four it
must not touch), and count writes, memory-enable stalls and a `done`
that waits.

They also check the exact start spacing (5 or 9 cycles) in a stall-free
phase, and the total cycle count.

## Relation to the published approach, and design choices

This design follows the paper *Finding and Finessing Static Islands in
Dynamically Scheduled Circuits*. Taken from it:

* the three parts of the wrapper;
* the shift register that requests the late input;
* stalling the whole island when that input is missing;
* the clock enable driven by backpressure and the memory arbiter;
* the deadlock rule;
* the example island with its offsets (0 and 13);
* the vector normalisation kernel's loop and its II of 9;
* statically scheduling the kernel's whole second loop, with its II of 2
  and no load-store queue;
* sharing operators inside that kernel's polynomial island;
* the merge, mux and branch semantics.

This design's own choices:

* **Number format.** binary32, with the simplifications listed above.
* **Latencies.** 4-cycle adders and 5-cycle multipliers in both islands.
  The paper's branch-latency example uses 5 and 4 instead.
* **Shift register.** It is the full island length, 18, so that its last
  bit also drives `x_valid`.
* **No output register.** The island's last pipeline stage is held by
  `ce` and serves as the output register.
* **Start slots.** The phase counter that places them.
* **Shared schedule.** The slot of each operation in `vnt_island_shared`.
  The paper says only that the operators are shared.
* **The `sent` flag.**
* **Data input.** Streams with a `last` flag replace array reads through
  a memory controller. `mem_ce` is an input.
* **Buffers.** Their depths and where they are placed.
* **One loop at a time.** The rule in `vnt_loop0` that admits a new loop
  only when the previous one is done.
* **Divider.** Its latency of 10; no divider latency is given.
* **Array length.** `N = 16` for the second loop; no array size is given.
* **Second-loop schedule.** The stage at which each operation happens and
  the memory port timing.
* **The top.** Putting the loops in one top, not chained.

Not included, because they are software or are not specified in enough
detail:

* the compiler analysis that finds islands;
* the offset and II optimiser;
* the static and dynamic scheduling tools;
* memory controllers and load-store queues;
* the connection of the kernel's two loops through arrays in memory
  (the second loop is built, but its arrays and weight come from
  outside);
* the original all-inputs wrapper.

The other benchmark kernels are each separate generated circuits and
are not part of this RTL.

## Notes on tool warnings

Three kinds of output are deliberately unused or undriven:

* `vnt_loop0` ignores the discarded arm of its `d` branch and the
  branch's condition-ready output. Condition-ready equals data-ready
  there, because both come from one fork output.
* `offset_wrapper` passes the island's result through as `x_data`.
* `elastic_branch` drives both data outputs from its input.

Synthesised alone, the last two therefore show outputs with no logic of
their own.
