# Free-running streaming kernels: a systolic matrix multiplier and a vector adder

A streaming accelerator is a graph of tasks that pass data to each other through
FIFOs. In the usual HLS style every task is a counted loop: it is started by a
kernel-level controller, it counts its iterations, and it reports `done`. The
controller in turn waits for every task. All of that counting and handshaking
costs logic in every task. Most of it is redundant, because a streaming task is
already regulated by its data: it cannot work without input tokens, and it
cannot go on when its output FIFO is full.

A **free-running** task drops the counting. It has no start, no done and no
length. In every cycle it checks whether all the inputs of its next iteration
are there and whether its outputs can take the results. If so, it fires.
Otherwise it waits. Only the tasks that touch external memory keep the
conventional start/done control, because only they know how much data a run
moves. The free-running tasks are marked **detached**: the kernel controller
starts the memory tasks and declares the kernel finished once they are done. The
detached tasks never stop. They just sit idle until the next run's tokens
arrive.

This repository holds synthesizable SystemVerilog for two kernels built this
way, side by side in `taro_top`:

* `mm_kernel` computes the matrix product C = A·B on a one-dimensional systolic
  array of L = 16 columns. Each column has a B feed task, an A feed task, a
  multiply-accumulate task and a C collect task, giving 64 free-running tasks.
  Three memory tasks sit at the chain ends.
* `vecadd_kernel` computes C = A + B: two memory read tasks, one free-running
  adder and one memory write task.

## How a free-running task fires

Every task talks to its neighbours through `stream_fifo` channels with
valid/ready/data handshakes. A token moves when `valid` and `ready` are both
high. A task's **firing rule** is a single combinational AND:

    fire = (every input this iteration reads is valid) & (every output this iteration writes is ready)

When the task fires, it pops those inputs and pushes those outputs in the same
cycle. Nothing else controls it. The adder (`vecadd_task`) is the pure case:
`fire = a_valid & b_valid & c_ready`, and `c = a + b`. The array tasks add a
little state that is not a loop index. `mm_feed_b` and `mm_collect` keep a
small modulo counter that decides which stream this iteration uses, and
`mm_pe` keeps a k counter and an accumulator. None of them knows how many
iterations a run has.

### Flushable pipelines

A pipelined free-running task must not hold its last results hostage until
more input arrives. Otherwise the final iterations of a run would never leave,
and a neighbour waiting for them would deadlock. `mm_pe` is a two-stage
pipeline:

* Stage 1 needs both input tokens and a free product register. It multiplies
  and records whether this is the K-th product of a row.
* Stage 2 needs nothing from the inputs. It adds the product to the
  accumulator. For the K-th product it also pushes the sum to the output, and
  so waits only on output space.

The pipeline therefore drains on its own. The sum of a row appears one cycle
after the row's last A/B pair is popped, even if no further input ever comes.

### FIFO choice

`stream_fifo` raises `in_ready` only when it is not full, and it never looks
at the consumer. As a result no ready signal ripples combinationally along the
64-task chain. The cost is a depth of 2 for full throughput, which is the
default for every stream.

## The kernel controller and detached tasks

`global_fsm` has two states, idle and running:

* On `ap_start` in idle it goes to running and pulses `task_start` to every
  task for one cycle.
* While running it ORs each task's `task_done` pulse into a `finished` mask.
* When `finished | DETACH` is all ones, it pulses `ap_done`, returns to idle
  and raises `ap_idle`. `ap_start` is ignored while running.

`DETACH` is a parameter with one bit per task. In `mm_kernel` it covers all
4L array tasks (their `task_done` is tied low, since they never finish). In
`vecadd_kernel` it covers the adder. With `DETACH = 0` the same FSM waits for
every task, which is the conventional scheme. With that setting a kernel whose
tasks are free-running never completes. The fault test of `vecadd_kernel`
shows exactly that.

## The matrix-multiplication array

    ext mem ─► read B ─► Bfeed0 ─► Bfeed1 ─► … ─► Bfeed15
    ext mem ─► read A ─► Afeed0 ─► Afeed1 ─► … ─► Afeed15
                           │         │               │
                         PE0       PE1      …      PE15
                           │         │               │
                        Collect0 ─► Collect1 ─► … ─► Collect15 ─► write C ─► ext mem

All arrows are `stream_fifo` channels. Compute task j produces column j of C,
so C has L = 16 columns. A is rows × K and B is K × L. K = 16 by default and
is fixed at compile time. The row count `rows` is a run-time argument, and
only the three memory tasks see it.

* **A chain (`mm_feed_a`).** Every compute task needs every element of A. Each
  A feed hands each token to its compute task and forwards it to the next
  feed, in the same cycle. The last feed (`LAST = 1`) does not forward.
* **B chain (`mm_feed_b`).** For every pair (row i, k), the B read task sends
  the L words B[k][0..L−1]. Feed j sees groups of L−j words. It keeps the
  first word of each group for compute task j and forwards the rest.
* **Compute (`mm_pe`).** It pairs A[i][k] with B[k][j] and accumulates over k.
  After K pairs it emits C[i][j].
* **C chain (`mm_collect`).** For every row, collect j first passes the j
  values C[i][0..j−1] from upstream, then C[i][j] from its own compute task.
  The chain end thus delivers each row of C in column order to the write task.

No task stores a matrix. As a result B is read from memory once per row of A:
the B read task's `repeat_n` argument is `rows`. This costs memory bandwidth
but keeps every array task stateless apart from its counters. That is what lets
the array tasks run without knowing any size.

**Memory layout.** Addresses are word addresses and matrices are row-major: A
at `base_a` (rows·K words), B at `base_b` (K·L words), C at `base_c` (rows·L
words).

**Timing.** The B stream carries rows·K·L words at one word per cycle at best,
and it sets the run time. A 24-row product at the default size takes 6,172
cycles from `ap_start` to `ap_done` with a memory that never stalls, against
6,144 B words. Each compute task gets one A/B pair every L cycles.

**Why L = 16.** The main configuration this design follows has 4.7% of its
tasks accessing external memory. With 3 memory tasks among 4L array tasks,
3/(4L) = 4.7% gives L = 16. The other ratios it was compared at (2.3%, 9.4%,
18.8%, 37.5%) correspond to L = 32, 8, 4 and 2, and are one parameter change
away.

**Correctness of a run.** Each run produces exactly the tokens it needs, and
every free-running task returns to the same counter phase at the end of a
run. The next run therefore starts cleanly on tasks that were never reset or
restarted. The end-to-end testbench runs several products back to back to
check this.

## The vector-add kernel

The two read tasks stream `len` words of A and B into the adder. The write task
stores `len` sums. The adder is detached, so `ap_done` follows the last write.
With a stall-free memory the kernel moves one element per cycle.

## Memory ports and the memory tasks

External memory is outside the design. Each memory task has its own port:

* **Read port.** `rd_req`/`rd_addr` are taken when `rd_gnt` is high. Data
  returns in request order on `rd_rvalid`/`rd_rdata`, with any latency and no
  back-pressure.
* **Write port.** `wr_req`/`wr_addr`/`wr_data` are taken when `wr_gnt` is high.

`mem_read_task` reads `count` words `repeat_n` times from `base`. It keeps
requests in flight only while fewer than `BUF_DEPTH` (8) words are requested
but not yet passed on. Every response therefore has room in its internal FIFO,
and a full output stream throttles the requests. Full rate needs a read
latency below `BUF_DEPTH − 1` cycles. `mem_write_task` writes `count` tokens to
consecutive addresses. Both tasks take a `start` pulse when idle and give a
one-cycle `done` pulse. A count of zero finishes at once.

These ports are deliberately simpler than the AXI interfaces a real FPGA
memory controller has. An AXI adapter would sit between them and the memory.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `taro_top`, `mm_kernel` | `L` | 16 | columns (compute tasks) of the array |
| | `K` | 16 | inner dimension of the product |
| | `DATA_W` | 16 | A, B and C width (C "short"; sums wrap modulo 2^16) |
| `taro_top` `VA_DATA_W`, `vecadd_kernel` `DATA_W` | | 32 | vector-add width (C "int") |
| kernels | `FIFO_DEPTH` | 2 | depth of every stream |
| `mem_read_task` | `BUF_DEPTH` | 8 | response buffer and request credit |
| `global_fsm` | `N_TASKS`, `DETACH` | 4, `4'b1000` | task count and detached-task mask |

Shared widths (`ADDR_W` = 32 for addresses, `SIZE_W` = 32 for run-time sizes)
and the FSM state type are in `taro_pkg`. Every register is cleared by
`rst_n`, an active-low asynchronous reset. The memory arrays inside the FIFOs
are not reset, because they are never read before they are written.

## What is this design's own, and what is not covered

The structure is the one this technique was evaluated on:

* feed, compute and collect chains, with memory access only at the chain ends;
* free-running tasks that fire on token availability;
* flushable pipelines;
* a kernel FSM that excludes detached tasks;
* 16-bit data in the main configuration, and a 32-bit vector-add example.

The following are this design's own choices. The source describes the array
only down to its block names:

* the contents of each array task;
* broadcasting A and re-streaming B once per row;
* row-major memory layout and C ordering;
* K = 16;
* the FIFO depths;
* the memory-port protocol;
* the pulse handshakes of the kernel FSM.

Not covered:

* The matrix-vector, Needleman–Wunsch and CNN systolic arrays that the
  technique was also measured on. They are only named, not described.
* Floating-point data types. Integer widths other than 16 are available
  through `DATA_W`.
* The source-to-source compiler that turns counted HLS loops into free-running
  ones. It is software. The RTL here is what such code becomes in hardware.
* The conventional baseline: counted loops with per-task start/done. It appears
  only as the `DETACH = 0` setting of the FSM.

For context: on HLS-generated versions of these benchmarks the free-running
style was reported to save on average about 16% of LUTs and 45% of flip-flops,
with no change in clock rate or cycle count. The RTL here was written by hand
and makes no such measurement.

## Simulating

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. `tb/ext_mem_model.sv` is a behavioural memory
with random grant stalls and a fixed read latency, used only by testbenches.
With Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/taro_pkg.sv tb/tb_taro_top.sv --top-module tb_taro_top
    ./obj_dir/Vtb_taro_top

`tb_taro_top` runs the whole design at its default sizes, with both kernels
busy at once. It runs three MM products, two vector additions and a
stall-free rate check. It counts each mechanism and requires every one to
occur:

* memory grant stalls;
* stream back-pressure on a memory task;
* a compute task waiting on an empty input;
* a compute task draining its pipeline with no input present;
* a detached finish (`ap_done` while the array tasks still run);
* reruns on tasks that were never restarted.

It takes a few seconds. `tb_mm_sweep` runs the array at the other sizes it
was evaluated at. The testbenches of the single blocks use reduced sizes
(for example L = 4, K = 3 in `tb_mm_kernel`).

## Files

* `rtl/taro_pkg.sv`: shared widths and the FSM state type.
* `rtl/stream_fifo.sv`: the stream channel.
* `rtl/vecadd_task.sv`, `rtl/mm_feed_a.sv`, `rtl/mm_feed_b.sv`,
  `rtl/mm_pe.sv`, `rtl/mm_collect.sv`: the free-running tasks.
* `rtl/mem_read_task.sv`, `rtl/mem_write_task.sv`: the memory tasks.
* `rtl/global_fsm.sv`: the kernel controller.
* `rtl/mm_kernel.sv`, `rtl/vecadd_kernel.sv`, `rtl/taro_top.sv`: the
  assembled kernels and the top.
* `tb/`: one testbench per module, the memory model, the size sweep and the
  end-to-end test.
