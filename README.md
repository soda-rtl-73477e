# SODA hardware platform: out-of-order task scheduling for CSPF accelerators

SODA is a way to use FPGA accelerators from ordinary threaded software. An
application runs on a host processor. Every hardware thread it creates turns
into a *task*: a call to one accelerator function, together with the data
buffers the call reads and writes. Tasks are sent to a hardware scheduler in
program order. The scheduler starts each task once the tasks that produce its
inputs have finished. It then dispatches ready tasks to free accelerators in
parallel. Programmers therefore never order hardware calls by hand.

The accelerator case study is CSPF, *constrained shortest path first*. CSPF is
the route computation a software-defined-network controller runs for a new
flow: find the cheapest path from A to B that uses only links with enough free
bandwidth. The platform carries two CSPF engines: one for graphs of up to 64
nodes and one for graphs of up to 128 nodes.

This repository holds synthesizable SystemVerilog for the hardware side:

```
            task_in ──► [ task queue ] ──► [ out-of-order task scheduler ] ── port 0 ──► [ CSPF engine, 64 nodes  ] ─┐
 host                                     rename · window · select · retire ── port 1 ──► [ CSPF engine, 128 nodes ] ─┤
            res_out ◄── [ result queue ] ◄── round-robin merge ◄────────────────────────────────────────────────────┘
                                               │ completion (order-buffer index) ──► scheduler
 g_*  (graph load) ─────────────────────────────────────────────────────────────────► both engines' graph memories
```

| file | module | role |
|---|---|---|
| `rtl/soda_pkg.sv` | `soda_pkg` | shared types: task, dispatched task, link, query, result |
| `rtl/soda_comm_fifo.sv` | `soda_comm_fifo` | valid/ready queue; carries tasks in and results out |
| `rtl/soda_task_scheduler.sv` | `soda_task_scheduler` | out-of-order scheduler with renaming |
| `rtl/cspf_accel.sv` | `cspf_accel` | CSPF engine (bandwidth-pruned Dijkstra) |
| `rtl/soda_top.sv` | `soda_top` | the platform; top level |

## Tasks, variables and tags

A task (`task_t`) contains:

- an 8-bit `id`, chosen by the host;
- a `func` code that selects the kind of accelerator;
- up to two source variables (`src`, with `src_used` bits);
- one destination variable (`dst`, with `dst_used`);
- a 32-bit `arg`.

*Variables* (16 of them, 4 bits) are the names the program uses for data
buffers. They behave like architectural registers in a CPU. The scheduler maps
each variable to one of 32 *physical tags*, and a tag names an actual buffer.
Each task that writes a variable gets a new tag. As a result:

- **read-after-write** is the only dependence that makes a task wait. A reader
  carries the tag of the newest older writer and waits until that tag is ready.
- **write-after-write** and **write-after-read** never stall. A later writer
  writes to a different tag, so it cannot overwrite a value that an older task
  still needs.

There is no speculation. Tasks are never cancelled, so the order buffer is used
only to know when a tag may be reused.

## The scheduler (`soda_task_scheduler`)

This is the part of the design that takes the most care. It has four
structures:

1. **Rename table and tag-ready bits.** `map_tag[v]` holds the tag of the
   newest value of variable `v`. After reset, variable `v` maps to tag `v` and
   all tags are ready.
2. **Free list.** A circular queue of unused tags. It holds tags 16 to 31 after
   reset. Issuing a task that writes a variable pops one tag. The task's
   destination then maps to that tag, and the tag's ready bit is cleared.
3. **Task window.** The window has `RS_DEPTH` = 8 entries. Each entry holds the
   renamed task plus one ready bit per source.
   - When an accelerator finishes, the tag it wrote is *woken*.
   - The wake-up also reaches a task being renamed in the same cycle, and the
     select logic.
   - So a consumer can be picked in the same cycle its producer completes.
4. **Order buffer.** It has 16 entries, one per task in flight, in issue order.
   Each entry records:
   - the tag the task's destination had before (`rob_old`);
   - the new tag;
   - a done bit.

   The oldest task retires once it is done, and its old tag goes back to the
   free list. This is safe: any task that could read the old tag was issued
   earlier, so it has already retired.

**Select.** Each accelerator port has one output register. When that register
is empty or being emptied, the port takes the oldest ready window entry whose
`func` matches the port (`ACC_FUNC`). "Oldest" means the order-buffer index
closest to the head. Ports are handled one after another within the cycle, so
two ports that serve the same function never take the same task.

**Interface and timing.**

- Issue (`in_valid`/`in_ready`): one task per cycle. `in_ready` is low when any
  of these is true:
  - the window is full;
  - the order buffer is full;
  - the free list is empty.
- Dispatch: `disp_valid`/`disp_ready`/`disp` per port. An offered task stays
  stable until the port takes it; an assertion checks this.
- Latency: a task with no pending inputs, issued into an idle scheduler at
  clock edge *t*, is taken at edge *t+2* if the port is ready.
- Completion (`comp_valid[i]`, `comp_rob[i]`): returns the order-buffer index
  the task was dispatched with. Several ports may complete in the same cycle.
- Retirement: `ret_valid`/`ret_id` report each task as it retires, in issue
  order. This is the host's join point.

## The CSPF engine (`cspf_accel`)

**Graph memory.** Each engine holds its graph as a `MAX_NODES × MAX_NODES`
array of `link_t {valid, cost[8], bw[8]}`, which is 16384 words for the
128-node engine. The host writes it through `g_we/g_u/g_v/g_link`, only while
the engine is idle (an assertion checks this).

**Query.** A query is a `cspf_query_t` packed into the task's argument word:

| bits | field | meaning |
|---|---|---|
| 7:0 | `src` | source node |
| 15:8 | `dst` | destination node |
| 23:16 | `min_bw` | minimum bandwidth a link must offer |
| 31:24 | `last` | node count − 1 |

Because the node count is part of the query, one engine serves graphs of any
size from 1 node up to `MAX_NODES`, using the low-numbered corner of its
memory.

**Search.** The engine runs Dijkstra's algorithm and ignores links that are
invalid or have `bw < min_bw`:

- Each round settles one node `u`. It scans `v = 0 … n−1`, one node per clock.
  In that scan it relaxes `u→v` and also tracks the cheapest unsettled node,
  which becomes the next `u`. A round therefore takes exactly `n` cycles.
- The search stops when the destination is settled, or when no reachable
  unsettled node is left.
- The engine then walks the predecessor chain back from `dst`, one node per
  cycle. This gives the hop count and the first hop.
- Ties go to the lower node number. A predecessor changes only when a strictly
  cheaper path is found.

A query costs at most about `n² + hops + 2` cycles, which is 16.5k cycles for
a full 128-node graph.

**Result.** The result (`cspf_result_t`) contains:

- `err`: src, dst or the node count does not fit this engine; no search is
  made;
- `reachable`;
- `cost` (16 bits);
- `hops`;
- `next_hop`, which is `dst` itself when `src == dst`.

## The platform top (`soda_top`)

- The host's tasks pass through a 16-deep queue into the scheduler.
- Port 0 (`FUNC_CSPF64` = 0) drives the 64-node engine. Port 1
  (`FUNC_CSPF128` = 1) drives the 128-node engine.
- Each engine returns a context with the task: its id, its order-buffer index
  and its destination tag.
- If both engines have a result in the same cycle, they take turns into the
  16-deep result queue (round robin).
- An engine signals completion to the scheduler only when the result queue
  accepts its result. A full result queue therefore holds the engines back, and
  in turn the retirement of their tasks.
- `g_acc` selects which engine a graph write goes to.
- `idle` means no task is in flight. `acc_busy` shows the two engines.

A result word (`result_t`) is the task id, the destination tag and the CSPF
result.

## Where this design makes its own choices

The published description of the platform gives the following:

- the layered system;
- the scheduler's function: out-of-order dispatch, renaming to remove WAW and
  WAR hazards, no speculation, parallel dispatch to accelerators;
- the accelerator's name and graph sizes (4 to 128 nodes; one 64-node and one
  128-node slot);
- the programming model with 256 hardware threads.

It gives no micro-architecture. All of the following are choices made for this
RTL:

- the renaming structures and all their sizes (16 variables, 32 tags,
  8-entry window, 16-entry order buffer, 2 sources per task);
- the task and result formats;
- the valid/ready handshakes;
- the use of Dijkstra, its one-node-per-cycle schedule and the tie rule;
- 8-bit link cost and bandwidth;
- the queue depths and the result arbitration.

The scheduler reported for the original FPGA prototype used 295 registers. This
one is larger: its window alone stores about 8 × 70 bits. If area matters,
shrink `RS_DEPTH` and the package sizes.

The original system names one CSPF accelerator in its prototype, but its
programming example sets up two (64-node and 128-node). This RTL follows the
two-engine setup.

**Not included, because they are not logic to design here:**

- the host processor;
- software execution nodes;
- the system bus and interconnect;
- memory and peripherals;
- run-time partial reconfiguration of the accelerator slots. Here both engines
  are fixed instances.

Tasks only express ordering through their variables: the CSPF engines neither
read nor write the buffers that the tags name.

## Verification

Every module has a self-checking testbench in `tb/`, and there is one more for the workloads. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_soda_comm_fifo`: random push/pop against a queue model. It checks the
  `in_ready` rule, the count, and a push and pop while full.
- `tb_cspf_accel`: 128-node engine. Random graphs of 4 to 128 nodes are
  checked against a reference Dijkstra in the testbench: cost, hops, first hop
  and reachability. It also covers `src == dst`, a bound that cuts every link,
  range errors, context return, result hold, and the latency bound
  `n² + n + 4`.
- `tb_soda_task_scheduler`: three ports (two share a function) with random
  accept and run times, running 240 random dependent tasks. It checks:
  - every source tag equals the tag of the newest older writer, and that
    writer has finished;
  - no destination tag is still live;
  - tasks retire in order;
  - the 2-cycle dispatch latency.

  It requires that RAW waits, out-of-order dispatch, renamed hazards, issue
  stalls and parallel dispatch all happen.
- `tb_soda_top`: the whole platform at its default parameters. It loads a
  64-node and a 128-node graph and runs 48 dependent tasks of 4 to 128 nodes,
  checking every result against the reference. It requires that RAW waits,
  out-of-order completion, both engines busy at once, result arbitration, task
  and result back-pressure, a range error and an unreachable destination all
  happen.

- `tb_soda_workloads`: the two evaluation workloads on the default top.
  - A node sweep: one query each on 4-, 8-, 16-, 32-, 64- and 128-node
    networks, with the cycle count from issue to result printed and bounded by
    `n² + n + 12`.
  - A 256-thread program: 128 threads on the 64-node engine and 128 on the
    128-node engine, each checked against the reference.

  All 256 threads retire in issue order after about 1.18 M cycles, with the
  two engines overlapping for about 0.27 M of them.

All five pass. Each block testbench was also run against a deliberately broken copy
of its module, and each detected the fault.

To simulate with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/soda_pkg.sv rtl/soda_comm_fifo.sv \
  rtl/cspf_accel.sv rtl/soda_task_scheduler.sv rtl/soda_top.sv tb/tb_soda_top.sv \
  --top-module tb_soda_top -o sim && ./obj_dir/sim
```

For a single block, replace the last testbench and the top module name, and
list only the RTL that the block uses. The simulations take a few seconds.
