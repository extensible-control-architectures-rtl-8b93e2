# JackKnife control: a pipeline built from small one-hot controllers

This RTL is the control of JackKnife, an 8-bit, six-stage, up to eight-way
multi-threaded microcontroller modelled on the AVR. There is no single large
state machine for stalls, flushes, multi-cycle instructions and thread
interleaving. The control is split into small controllers, and each one
describes a single concern:

* a **pipeline controller** for the six stages (schedule, fetch, decode,
  read, execute, commit): it interlocks the stages and handles per-stage
  stall and flush;
* a **branch/jump unit controller** and a **load/store unit controller** for
  instructions that take more than one cycle;
* one of three interchangeable **multiplier controllers**.

The controllers talk to each other through two signals each: a *request*
into a unit and a *stall* back to the pipeline. Adding a unit or a stall
source means adding one controller and ORing one more stall input into one
stage. No existing state machine has to be re-derived.

Each controller was first specified as an extended regular expression, in a
production language with non-deterministic (NFA) semantics, and then
synthesised to one-hot logic. The modules here are hand-written
SystemVerilog of those circuits. They keep the one-hot structure, so each
register still matches one step of the specification.

Also included are two small controllers that introduce the style: a
generic tail-throttled pipeline, and a memory write controller with bus
arbitration.

## Reading the controllers: points of control

Every controller is built from the same few rules. They are the key to the
code.

* **A state bit is a point of control.** A `_q` register that is 1 means
  "there is work waiting at this step". Several bits can be 1 at once: a
  pipeline holds one point of control per busy stage. Two points of control
  that reach the same step in the same cycle simply merge (OR).
* **Steps take one cycle.** A step *matches* in the cycle when it has a point
  of control and its input condition holds. The step's outputs are then
  asserted **combinationally in that same cycle**. The point of control
  reaches the next step at the next clock edge.
* **Waiting loops.** "Wait while X" is a bit that reloads itself while X
  holds: `wait_q <= active & X`. The step after the loop matches in the first
  cycle with `active & ~X`.
* **Context generator.** The pipeline and pipelined-multiplier controllers
  start with a bit that, once started, stays 1 forever. It offers a fresh
  point of control every cycle. The non-pipelined units instead have an
  *idle* bit, which loops while no request is present.
* **Start.** A one-cycle `start` pulse creates the first point of control.
  The top level raises it in the first clock cycle after reset is released.
  Reset (asynchronous, active low) clears every state bit.

Active-low signals end in `_n`, as in the original specifications.

## The pipeline controller (`jk_pipeline_ctrl`)

Each of the first five stages has two bits. The *accept* bit is the context
handed on by the previous stage. The *stall* bit is a context the stage keeps
while it is stalled. For a stage `s`:

```
active_s = (context arriving from stage s-1 | stall bit of s) & flush_n_s
stall_s  = active_s &  hold_s        -> stall bit of s next cycle
accept_s = active_s & ~hold_s        -> the stage's output; accept bit of s next cycle
```

The stall of a stage is computed **combinationally from the tail of the
pipeline back to the head**, all in the same cycle. `hold_s` is the stall of
the next stage, ORed with that stage's own stall sources:

| stage    | flushed by (active low) | held by                                 |
|----------|-------------------------|-----------------------------------------|
| schedule | –                       | `stall_fetch`                           |
| fetch    | `flush_schedule_n`      | `stall_decode` or `stall_ibus`          |
| decode   | `flush_fetch_n`         | `stall_read`                            |
| read     | `flush_decode_n`        | `stall_execute` or `stall_dependency`   |
| execute  | `flush_read_n`          | `stall_lsu` or `stall_bju` or `stall_mu`|
| commit   | –                       | – (`commit` is execute's accept, one cycle later) |

Consequences worth knowing:

* A stage stalls only if it holds work. A bubble in the pipeline absorbs the
  stall, so the stages in front of the bubble keep moving.
* The outputs `schedule`…`execute` are the pipeline-register latch enables.
  They are combinational: a stall input raised in cycle *t* holds its stage
  and everything behind it in cycle *t*.
* A low flush input empties its stage in that cycle. It removes both the
  arriving context and a held stall context, so a stalled instruction is
  swept away too.
* Programming mode: after `start`, the controller waits while
  `programming_n` is low (program upload). `schedule` is first raised in the
  cycle after the first cycle with `programming_n` high. After that,
  `programming_n` is ignored.

Because the context generator offers work every cycle, the schedule stage is
always busy. Whether a slot carries a real instruction is decided by the
thread scheduler, which can leave a slot empty.

## Multi-cycle units: request and stall

A unit receives a request in the cycle its instruction is accepted by the
execute stage: `execute` AND the operation class `exec_op` of that
instruction. In that first cycle the unit does not stall. The instruction
moves on to commit, and the unit raises `stall_pipeline` from the next cycle
until it finishes. The stall therefore holds the *following* instruction in
execute. A unit never receives a request while it is busy, because its own
stall keeps the execute stage from accepting.

### Branch/jump unit (`bju_ctrl`)

One operation at a time. Timelines, counted from the request cycle 0:

| operation                      | cycle 0          | later cycles                                            | stall in    |
|--------------------------------|------------------|---------------------------------------------------------|-------------|
| jump                           | `jump_accept`    | –                                                       | –           |
| branch, no status wait         | `branch_accept1` | –                                                       | –           |
| branch with status wait        | `branch_latch`   | 1: `branch_accept2`                                     | cycle 1     |
| call                           | `call_accept1`   | `call_wait` while `lsu_ready_n` high, then `call_accept2`   | all after 0 |
| return                         | `return_accept1` | `return_wait` while `lsu_ready_n` high, then `return_accept2` | all after 0 |
| skip                           | `skip_accept1`   | –                                                       | –           |

`cleanup` marks the end of an operation, when buses are released. It is
raised together with `idle` in the cycle right after the operation ends, but
only if no new request arrives in that cycle. A back-to-back request skips
the cleanup, because the next operation sets up the buses itself.

### Load/store unit (`lsu_ctrl`)

The memory protocol is synchronous. A store takes one cycle. Load data is
valid in the cycle after the address. `memory_wait_n` low inserts wait
states.

| operation | requested by   | cycles (no waits) | outputs in order                                              |
|-----------|----------------|-------------------|---------------------------------------------------------------|
| store     | pipeline       | 1                 | `store_output_address_data`                                   |
| load      | pipeline       | 2                 | `load_output_address`, [`memory_wait1`…], `ld_input_data`     |
| push2     | branch/jump    | 2                 | `push2_accept1`, `push2_accept2`                              |
| pop2      | branch/jump    | 3                 | `pop2_accept1`, [`memory_wait2`…], `pop2_accept2`, [`memory_wait3`…], `pop2_accept3` |

A call or return moves a 16-bit address through an 8-bit memory, so it needs
two memory operations. The pop overlaps them: `pop2_accept2` takes the first
byte and issues the second address. The load/store unit has its own
sequences for these, so the datapath does not have to issue two separate
pushes or pops.

Push and pop requests come from the branch/jump unit while the pipeline's
`request_n` is high. Under the NFA rules the idle loop therefore keeps
running next to the push or pop: `idle` stays high, and `cleanup` follows the
operation in the next cycle. The pipeline is stalled during these
operations, so no second request can arrive.

At the top level, a call's first cycle requests the push, and a return's
first cycle requests the pop. The "ready" that ends the branch/jump unit's
wait is the cycle of `push2_accept2` or `pop2_accept3`. A call therefore
stalls the pipeline for exactly 1 cycle, and a return for 2 cycles plus
memory waits.

### Multiplier controllers (`mu_ctrl_piped2`, `mu_ctrl_piped3`, `mu_ctrl_var`)

All three use the same request/stall interface, so parameter `MU_KIND` of
`eca_top` swaps them with no other change:

* **2-cycle pipelined** (`MU_PIPED2`, the default): `latch_intermediate` in
  the request cycle, then `latch_result` and `stall` one cycle later. It can
  accept a request every cycle.
* **4-cycle pipelined** (`MU_PIPED3`): `latch_operands`, then two cycles of
  `latch_intermediate`, then `latch_result`. `stall` is high in the last
  three cycles. It is pipelined; overlapping operations OR their outputs.
* **Variable length** (`MU_VARIABLE`): one multiply at a time.
  `latch_operands`, then `latch_intermediate` until the datapath raises
  `mult_complete`, then `latch_result`. `stall` is high from the cycle after
  the request until the result.

## Threads (`thread_scheduler`, `thread_tag_pipe`)

Each accepted schedule slot issues one thread:

* An interrupt on `irq[i]` is remembered. Its service thread `i` is issued at
  the next schedule slot, which is the next cycle unless the pipeline is
  stalled. Several pending interrupts are served lowest index first.
* Otherwise the threads set in `thread_active` are issued round robin,
  starting after the last thread issued. Inactive threads are skipped.
* If no thread can run, `sched_valid` is low and the slot is a bubble.

Interleaving threads means consecutive instructions in the pipeline usually
come from different streams. Each instruction carries its thread number.
`thread_tag_pipe` keeps a tag (thread number plus a valid bit) for each stage
from fetch to commit. A tag moves forward in the same cycle as the stage
acceptance that moves its instruction, so it stays with its instruction
through stalls. Register-file access, forwarding and dependency checks would
compare against these tags. Those checks belong to the datapath and are not
part of this RTL.

## Introductory controllers

* `basic_pipeline_ctrl`: the generic tail-throttled interlocked pipeline.
  `N_STAGES` stages (default 6), one `stall` input at the tail, and one accept
  and one stall output per stage. `jk_pipeline_ctrl` is this controller with
  stage names, extra stall sources, flushes and the programming wait added.
* `mem_write_ctrl`: on `request` it raises `latch_operands`. It then waits for
  `bus_free` and raises `output_to_bus`. One cycle later it raises
  `release_bus`. It accepts a new request every cycle.

## Top level (`eca_top`)

`eca_top` connects the JackKnife control. The two introductory controllers
sit beside it with their own `bp_` and `mw_` ports. Everything that would
connect to the datapath is a port:

* **Inputs:** the operation class of the instruction in execute (`exec_op`,
  type `eca_pkg::exec_op_e`), `branch_wait_on_status`, `memory_wait_n`,
  `mult_complete`, the dependency and instruction-bus stalls, the four
  flushes, `thread_active` and `irq`.
* **Outputs:**
  * stage acceptances (`stage_accept[0]` = schedule … `[5]` = commit) and
    stage stalls;
  * the scheduler's choice, the interrupts not yet served (`irq_pending`)
    and the per-stage tags;
  * the action outputs of each unit, bundled in the packed structs
    `bju_act_t`, `lsu_act_t` and `mu_act_t`. In `mu_act_t`, `idle` is used
    only by the variable-length controller, and `latch_operands` is unused
    by the 2-cycle one.

Parameters: `MU_KIND` (default `MU_PIPED2`), `N_THREADS` (default 8) and
`BP_N_STAGES` (default 6).

## Where this RTL departs from the original specifications

* **Instruction-bus stall.** The drawn pipeline-controller circuit has an
  input `Stall_Ibus` at the fetch stage, but the textual specification does
  not. It is included here as `stall_ibus`: when the load/store unit has the
  instruction bus, fetch must wait. Tie it low to get the textual behaviour.
* **Variable-length multiplier idle loop.** The specification asks for at
  least one idle cycle before each request. Read literally, a multiply
  issued in the first cycle after another multiply (or at start) would find
  no point of control, and the controller would stop for good. This RTL
  allows zero idle cycles, as the branch/jump and load/store controllers do.
* **Last stage of the basic pipeline.** Stage 6 has its own stall bit, as the
  specification text says. The drawn circuit instead feeds the stall input
  straight into stage 5.
* **Load/store idle during push/pop.** This follows the specification's NFA
  semantics (see above). A design that wants `idle` low during a push or pop
  must gate it.
* **Not included:** the AVR datapath (register file with forwarding, status
  and stack-pointer registers, ALU, decoder, dependency detection), the
  multiplier arithmetic, and the memories. The unit of work in this RTL is
  the control signal, not data.
* **Glue chosen here, where the original gives only the architecture:**
  * the `exec_op` encoding and how requests are derived from it;
  * how the push/pop requests and the ready signal connect;
  * the start pulse and the reset;
  * the scheduler's priority among several interrupts and its
    pending-interrupt register;
  * the tag valid bit.

The originally reported figures, over 1.8 GHz and about 3,000 µm² for the
pipeline controller and over 400 MHz for the whole processor in a 0.15 µm
process, refer to the complete chip and were not reproduced.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Compile
the package first, for example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module bju_ctrl_tb \
    rtl/eca_pkg.sv rtl/bju_ctrl.sv tb/bju_ctrl_tb.sv
obj_dir/Vbju_ctrl_tb
```

For the top level, list all of `rtl/*.sv` (package first) and pick one of
these testbenches:

* `eca_top_tb`: default parameters.
* `eca_top_mu_piped3_tb` and `eca_top_mu_var_tb`: the other two multiplier
  controllers.

These three share their stimulus and checks in `tb/eca_top_checks.svh`. After
a programming phase they run 20,000 cycles of random instruction classes,
memory waits, stalls, flushes, thread masks and interrupts.

They check that:

* commit follows execute;
* execute never accepts while a unit stalls;
* each instruction class reaches its unit in its execute cycle;
* calls and returns end with the second push/pop byte;
* load data and multiplier results arrive with the right latency;
* issued threads are runnable;
* every unit is idle after draining.

They also count each mechanism: every stall source, every flush, each branch
and load/store operation, memory waits, cleanups, interrupt service threads,
bubbles, the basic pipeline's stall and the memory write controller's bus
wait. A mechanism that never happens counts as a failure.

The unit testbenches compare every output, every cycle, against timelines or
models written independently of the RTL. The pipeline models use a
slot-occupancy formulation rather than the controllers' stall-bit logic.

## Changing the design

* **Add a stall source:** OR it into the `hold` of the stage it should hold
  in `jk_pipeline_ctrl`.
* **Add a multi-cycle unit:** decode its request from `execute` and
  `exec_op` in `eca_top`, and OR its stall into the execute stage's hold, as
  `stall_mu` is.
* **Change the number of threads:** `N_THREADS`. Tags are `$clog2(N_THREADS)`
  bits wide.
