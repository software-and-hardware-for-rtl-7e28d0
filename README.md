# Thread-level speculation memory system for a four-processor chip

This RTL implements the memory side of a single-chip multiprocessor that runs
the iterations of a sequential loop in parallel, *speculatively*. Each of the
four processors runs one iteration (a *task*), numbered in program order. The
hardware keeps the effect of every task invisible to the sequential state until
that task is the oldest one running. It also detects read-after-write (RAW)
hazards: a task that read a word before an earlier task wrote that word has
used stale data. When that happens, the hardware rolls back that task and
every later task so that software can re-execute them.

The processors themselves, their instruction caches and the external memory
interface are not part of the design. The top module, `tls_cmp_top`, brings
out, for each processor:

- a load/store port;
- a kernel-mode flag;
- a port for the speculation operations.

## Execution model seen by software

A processor drives `cpu_op` with `cpu_op_valid` and waits for `cpu_op_done`.
The operations are:

| Operation | Effect |
|---|---|
| `OP_START` (arg = task number) | Join speculative mode as task *n*. The first START while speculation is off turns speculation on and makes *n* the oldest task. |
| `OP_COMMIT` | Wait until this task is the oldest (the *head*). Then make its writes part of the sequential state. |
| `OP_COMMIT_ADV` | As COMMIT. Then the task number advances by NCPU and head-ship passes to the next task number. |
| `OP_TERMINATE` | As COMMIT. Then discard the state of every other processor, pulse `cpu_stop` to them, and leave speculation mode. |

A RAW hazard pulses `cpu_restart[c]` together with `cpu_restart_task[c]` on the
processor that read too early and on every processor running a later task. The
hardware has already discarded their speculative state by then. The restart
itself (jumping back to the start of the iteration) is software's job.

A store with `cpu_req_sync` set is a *synchronising* write. It is a write that
the program placed on purpose to pass a value between tasks, and it never
raises a RAW hazard.

## The head and task order

`spec_ctrl` keeps a current-task register. The active processor whose task
number equals that register is the head. It holds the oldest task, so its
reads are not speculative. COMMIT_ADV increments the register, which moves
head-ship to the next task in round-robin order.

A commit completes in the first cycle in which all of these hold:

- the issuing processor is the head;
- its store FIFO is empty, so all of its writes have reached the write bus;
- the write-log pool can take the commit, meaning a free log exists or the
  task's log is empty.

## Speculation bits in each L1 (`spec_l1_dcache`)

The primary data cache has the following organisation:

- 8 KB, direct-mapped, 16-byte lines;
- write-through, with no allocation on a store miss.

Besides valid, tag and data, every line carries these speculation bits:

- **read bit, one per 32-bit word.** A speculative load sets it.
- **modified bit.** Set when the processor stores to the line, or when a refill
  brought in bytes from another task's uncommitted log. A roll-back invalidates
  these lines.
- **pre-invalidate bit.** Set when a *later* task writes the line. The line
  stays usable, because the later write is not visible to this task. It is
  invalidated when this task commits, so the processor does not carry the stale
  copy into its next task.

Every write on the write bus carries the writer's task number, and each L1
snoops it:

| Writer | Effect on a matching line |
|---|---|
| earlier task, or a non-speculative writer | Invalidate the line. If the word's read bit is set and the write is not synchronising, raise a RAW hazard (`viol`). |
| later task | Set pre-invalidate. |
| this L1 not speculating | Invalidate. |

**Victim cache.** Speculative read state must survive replacement. When a line
with speculative state is evicted and the task is not the head, the line's read
bits move to a small fully associative victim cache (`rws_victim_cache`,
4 entries). Snoops check that victim cache as well. When it is full, the miss
stalls until the task becomes the head, because the head's reads need no
tracking.

**Commit and roll-back.** On commit, the L1 clears all read and modified bits,
invalidates the pre-invalidated lines and empties the victim cache. On
roll-back, it invalidates the modified lines, clears the read bits and empties
the victim cache.

**Miss timing.** A miss waits until the processor's own store FIFO is empty.
This way the line it fetches includes the processor's own earlier stores, which
are held in its write log.

## Write logs and the refill merge (`write_buffer_pool`, `spec_write_buffer`, `line_merge`)

Speculative writes are kept out of the L2 until their task commits. Beside the
L2 sits a pool of 2 × NCPU = 8 write logs. Each log is fully associative and
holds 16 lines of 16 bytes with a byte mask per line.

**Routing a write.** Each write that wins the write bus is routed as follows:

- **Speculative writes** go into the writer's live log.
- **Non-speculative writes** (speculation off, kernel mode, or the head whose
  log is empty) go straight into the L2. They wait until no committed log is
  still draining, so they cannot overtake older committed data.
- **Commit (double buffering).** The committing processor's log joins a drain
  queue and the processor gets a free log at once. The queue copies logs into
  the L2 one line per cycle, one log at a time, in commit order.
- **Roll-back** discards the live log in the same cycle.
- **The head's log is full.** It is committed early and the head continues with
  direct writes.
- **A later task's log is full.** The task waits until it becomes the head.

**The refill merge.** This is the part that makes speculation correct. An L1
miss reads the line from the L2. `line_merge` then overlays it, byte by byte,
with every log that holds newer data for that reader. From highest to lowest
priority:

1. the reader's own live log;
2. the live logs of earlier tasks, later tasks first;
3. committed logs that are still draining, most recent commit first;
4. the L2 line.

Logs of later tasks never contribute. If any byte came from an uncommitted log,
the line is installed with its modified bit set, so a roll-back of the reader
drops it.

## Buses (`bus_arbiter`, `store_fifo`, `l2_cache`)

There are two shared buses:

- the **write bus**, which carries one word with byte enables per cycle;
- the **read bus**, which carries one line request per cycle.

Each bus has a pipelined round-robin arbiter. A request in cycle N-1 is
granted for cycle N, so the owner uses the bus in the same cycle the grant is
visible.

Stores enter a 4-entry FIFO between the L1 and the write bus, so the
processor keeps running while a store waits for the bus. Every write-bus
transaction is performed in the cycle it is broadcast: it goes into a log or
into the L2.

The read bus timing is:

1. The grant is made in cycle N. The L2 line is read in N.
2. The merge and the L1 install happen in N+1.

Seen from the processor:

- A load hit answers the cycle after the request.
- A miss on a quiet system answers 5 cycles after the request.
- Stores are acknowledged by `cpu_req_ready` alone.

The L2 is a 64 KB line-wide array with the following ports:

- a masked write port, used by the write bus and the drain;
- a read port for the read bus, with a latency of one cycle.

## Kernel mode

A processor with `cpu_kernel` high bypasses speculation:

- its loads set no read bits;
- its stores go straight to the L2;
- its stores are broadcast with no task number, so every speculating L1 checks
  them for RAW hazards, as it would for a write from an earlier task.

## Module map

| File | Role |
|---|---|
| `rtl/tls_pkg.sv` | Widths, line and store types, write-bus struct, operation enum |
| `rtl/tls_cmp_top.sv` | Top: buses, per-processor L1 and store FIFO, pool, L2, controller |
| `rtl/spec_ctrl.sv` | Task numbers, head, commit sequencing, roll-back |
| `rtl/spec_l1_dcache.sv` | L1 data cache with the speculation bits |
| `rtl/rws_victim_cache.sv` | Read bits of evicted speculative lines |
| `rtl/store_fifo.sv` | Store FIFO between L1 and write bus |
| `rtl/bus_arbiter.sv` | Pipelined round-robin arbiter |
| `rtl/write_buffer_pool.sv` | 2 × NCPU write logs, routing, drain, merge ranking |
| `rtl/spec_write_buffer.sv` | One fully associative write log |
| `rtl/line_merge.sv` | Byte-wise priority merge |
| `rtl/l2_cache.sv` | Shared L2 array |

Parameters of the top (defaults):

| Parameter | Default | Meaning |
|---|---|---|
| `NCPU` | 4 | processors |
| `NWB` | 8 | write logs |
| `L1_LINES` | 512 | L1 size in lines (8 KB) |
| `VICTIMS` | 4 | victim entries per L1 |
| `SF_DEPTH` | 4 | store FIFO depth |
| `WB_LINES` | 16 | lines per write log |
| `L2_WORDS` | 16384 | L2 size in words |

The line size (`LINE_WORDS` = 4) is set in the package.

## Where this design makes its own choices

The following points are based on the described design:

- four processors;
- write-through L1s on a write-invalidate write bus;
- one-cycle bus transactions with grants a cycle ahead;
- one read bit per word, plus modified and pre-invalidate bits per line;
- the victim store and the stall when it overflows;
- twice as many fully associative write logs as processors, with double
  buffering and one-at-a-time draining;
- the byte-priority refill merge;
- the kernel-mode bypass.

The following are this design's own choices:

- cache geometry and sizes;
- log, victim and FIFO depths;
- round-robin arbitration;
- the policy for full logs, including the early commit of the head's log;
- routing the head's writes directly to the L2 once its log is empty;
- the exact cycle timing;
- all handshakes.

Limits:

- The L2 holds all of memory. There is no miss path to external memory.
- The processors are not modelled. The testbench drives their memory and
  operation traffic.
- A store that is already on the write bus in the cycle its task is rolled
  back is still broadcast into the log being discarded. Every later task is
  rolled back in the same cycle, so the only lasting effect is a spurious
  pre-invalidation in earlier tasks' caches. That costs at most an extra miss.
- A later task whose write log fills up waits until it becomes the head. The
  waiting is correct but serialises tasks that write more than 256 bytes.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

`tb/tb_tls_cmp_top.sv` runs the whole design at its default parameters. Four
behavioural processors execute a speculative loop of 21 iterations with
commit-and-advance. The iterations include:

- loop-carried dependences, which cause RAW roll-backs and restarts;
- conflicting addresses, which fill the victim store and cause stalls;
- many stores, which fill the logs and cause early commits;
- a kernel-mode store;
- a final TERMINATE.

The testbench compares the final memory with a sequential execution. It also
counts each mechanism and fails if any never happened:

- RAW roll-back and restart;
- commit;
- pre-invalidation;
- forwarding from an uncommitted log;
- log drain;
- victim capture and victim stall;
- early log commit;
- terminate stop;
- commit wait;
- kernel bypass.

`tb/tb_tls_workloads.sv` also runs at the default parameters. It runs four
loop kernels whose dependence patterns mimic four small integer programs, wc,
eqntott, grep and diff. Each kernel runs once sequentially on one processor and
once as speculative tasks on four. The testbench checks that both runs leave
the same results.

| Kernel | Dependence shape | Speedup | Tasks restarted |
|---|---|---|---|
| wc | late update, synchronised with a flag | 2.65 | 0% |
| eqntott | read mid-iteration, written later | 1.03 | 79% |
| grep | independent iterations, every other one updates early | 2.49 | 35% |
| diff | read at start, written at end | 0.85 | 78% |

These numbers reflect the modelled processor work (idle cycles). They show
the trend, not absolute performance: the fewer restarts, the higher the
speedup.

To simulate a testbench with Verilator 5, run from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/tls_pkg.sv tb/tb_tls_cmp_top.sv --top-module tb_tls_cmp_top -Mdir obj
./obj/Vtb_tls_cmp_top +verilator+rand+reset+2
```

Replace the testbench file and top module name to run a unit test.
