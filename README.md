# A fork-join accelerator for OpenMP-style parallel regions

This is SystemVerilog RTL for application-specific hardware that runs OpenMP
`parallel` regions directly, with no processor. A master thread **P0** forks
a team of slave threads **P1..PN**, and each slave is a hardware state
machine that computes one chunk of a loop. P0 joins them again when every
slave has reported back. Shared data goes through a two-level memory: a
private L1 cache per thread, one shared L2 cache, and off-chip memory. The
L1 caches are **not coherent**. Instead, the design follows OpenMP's relaxed
memory model: a thread's cache is its own "temporary view" of memory, and it
is flushed at the points where OpenMP demands a flush. Critical regions are
served by a small lock unit, **P_synch**.

The block structure and the protocols follow the article *Accelerating OpenMP
Applications Through Parallel Hardware Architecture* (Doğan, San, Ebcioğlu).
That article describes an architecture rather than a circuit. Every width,
size, cache organisation and network structure here is therefore this
implementation's own choice. Each one is listed under "Departures and
choices" below.

```
                 P0 ── L1$0 ─┐
                 │           │
            task network     │
          ┌──────┼──────┐    │
          P1     P2 ... PN   │          P_synch
          │      │      │    │             │
          L1$1   L1$2   L1$N │     synchronization network
          └──────┴──┬───┴────┘     (P1..PN  <->  P_synch ports)
              L1-to-L2 network
                    │
                  L2$ ── memory controller port (mem_*)
```

## How one parallel region runs

P0 (`master_thread`) gets a run configuration (`run_cfg_t`) and a `start`
pulse. It then works through these steps:

1. **Entry flush.** P0 sends `flush_all` to its own L1 and waits for the
   acknowledgement. After that, everything P0 wrote before the region is in L2.
   For Gauss-Seidel, P0 first stores `dmax = 0`, so the flush also publishes
   that value.
2. **Fork.** P0 cuts the iteration range `first..last-1` into chunks of
   `chunk` iterations. It sends one *start request* per chunk. A start
   request carries everything the task needs: the kernel, `lo`/`hi`, `n`,
   `m`, three base addresses and a synchronization identifier.
3. **Work.** A slave (`slave_thread`) takes the request from its receive
   FIFO and runs the kernel. It makes one blocking load or store at a time
   to its L1.
4. **Exit flush.** The slave sends `flush_all` to its L1, waits for the
   acknowledgement, and only then sends a *finish* response. A dot-product
   task sends a *finish_reduction* response instead, which carries its
   partial sum.
5. **Join.** P0 accepts finish responses at any time, including while it is
   still forking. The region is over when P0 has received as many finish
   responses as it sent start requests. This count is the implicit barrier
   at the end of the region.
6. **After the join,** what happens depends on the kernel:
   - Dot product: P0 stores the sum `r` at `base_c` and flushes that one
     address.
   - Gauss-Seidel: P0 loads `dmax`. The entry flush invalidated P0's copy, so
     this load fetches the value from L2. If `dmax > eps` and fewer than
     `max_iter` sweeps have been made, P0 repeats from step 1.

At the end, `done` pulses for one cycle. `result` then holds `r` or the last
`dmax`, and `iterations` holds the number of regions run. Final data sits in
L2. Pulse `l2_flush` and wait for `l2_flush_done` to have it written to
memory.

### Static and load-balanced scheduling

`cfg.dynamic_sched` selects how chunks are handed out:

- **Static (`0`):** chunk *k* goes to slave (*k* mod N)+1. The task network
  delivers a request to that slave only, and waits while that slave's FIFO is
  full.
- **Dynamic (`1`):** each request is marked `any_free`. The task network
  (`task_net`) gives it to any slave whose receive FIFO is not full. When
  several slaves are free, it picks them round-robin.

If no slave can take a request, `p0_req_ready` stays low and **P0 stalls**.
Each slave holds at most 1 running task plus `FIFO_DEPTH` queued ones. So with
N = 4 and `FIFO_DEPTH` = 2, a region with more than 12 chunks always stalls
P0 for a while.

## Nested parallelism

Setting `NSUB > 0` turns every slave position into a small team of its own.
This gives a second level of parallelism, like a `parallel` region nested
inside another one. In this configuration, slave *i* is replaced by a
sub-master, P_i-P0 (`nested_master`).

Towards P0, the sub-master behaves exactly like a slave. It takes start
requests from the original task network and answers each one with a single
finish response. It also keeps the original L1 cache of that position.

Inside, the sub-master acts as a master:

1. It splits its chunk into `NSUB + 1` nearly equal parts.
2. It runs the first part on its own embedded slave core.
3. It sends the other parts to its `NSUB` subthreads over a private task
   network, using static destinations.
4. It waits for its own part and for every subthread it started.
5. It adds up any partial sums and sends its own finish, or
   finish_reduction, response to P0.

The subthreads are ordinary `slave_thread`s. Each has its own L1 cache on
the shared L1-to-L2 network and its own port on the synchronization network,
so subthreads can take part in critical regions like any other thread.

Thread identifiers run as follows:

- 1..N: the slave positions, or with nesting the sub-masters;
- N+1 upwards: the subthreads, position by position.

Each L1 cache carries the same number as its thread.

Only two levels are built. A third level would replace each subthread with
another sub-master in the same way.

## Memory without coherence

This is the least conventional part of the design.

**Per-byte dirty bits.** Each L1 line (16 bytes) has 16 dirty bits. A line is
written to L2 together with its dirty mask, and L2 merges only the masked
bytes. This matters because two threads may write different bytes of the
same line. In the Gauss-Seidel test, for example, neighbouring rows of the
grid share lines at chunk boundaries. Each L1 holds its own stale copy of the
rest of the line. With one dirty bit per line, whichever thread flushed last
would overwrite the other thread's bytes with stale data. With a mask per
byte, both updates survive. This is the false-sharing case, and the L1 test
checks it directly.

**Flushes instead of coherence.** The L1 cache (`l1_cache`) accepts four
requests:

| request      | effect |
|--------------|--------|
| `load`       | Read a word. On a miss, a dirty victim line is written back first, then the line is read from L2. |
| `store`      | Write the enabled bytes and mark them dirty. A miss first fetches the line (write-allocate). |
| `flush_list` | One address per request. The line holding it is written back with its mask (if dirty) and invalidated. Only the entry with `last = 1` is acknowledged. |
| `flush_all`  | Every dirty line is written back, every line is invalidated, then one acknowledgement. |

Invalidating matters as much as writing back. A thread's next read after a
flush must come from L2, otherwise the thread would never see the other
threads' writes. The flush points are:

- entry to a region (P0 sends `flush_all`);
- exit from a task (each slave sends `flush_all`);
- around the critical region (`flush_list` of the shared variable, at entry
  and at exit).

The L2 cache (`l2_cache`) is a plain write-back cache. It is direct mapped and
keeps one dirty bit per line. It serves line reads and masked line writes.

## Critical regions and P_synch

Every critical region is given a synchronization identifier, `synchID`. The
synchronization network (`sync_net`) routes a request `{threadID, synchID}` to
P_synch port number `synchID`. Each port of `psynch` holds a register,
R_synch, which starts as NULL. For each request the port does one of three
things:

- **Acquire:** if R_synch is NULL, set R_synch to threadID.
- **Release:** if R_synch equals threadID, set R_synch to NULL.
- **Reject:** otherwise, leave R_synch unchanged.

The port then answers with the new value of R_synch. The thread compares that
value with its own ID. If the lock was refused, the thread waits a
pseudo-random 0..15 cycles (from a per-thread LFSR) and asks again.

Inside the lock, the Gauss-Seidel slave runs this sequence:

1. `flush_list(dmax)`, so that its copy of `dmax` is dropped;
2. `load dmax`, which fetches the latest value from L2;
3. store `dmaxL` if it is larger;
4. `flush_list(dmax)`;
5. release request.

A release always comes from the owner, so P_synch answers it with NULL. An
assertion in `slave_thread` checks this.

## The kernels

One `slave_thread` module implements all four task types. The start request
selects the type. All arithmetic is 32-bit integer.

- `K_MATVEC`: for each row *i* in `lo..hi-1`, `y[i] = Σ_j A[i·m+j]·x[j]`.
  A is at `base_a`, x at `base_b` and y at `base_c`.
- `K_DOT`: the partial sum of `b[i]·x[i]` for *i* in `lo..hi-1`. b is at
  `base_a` and x at `base_b`. The sum is returned in the finish_reduction
  response.
- `K_GS`: one Gauss-Seidel sweep over grid rows `lo..hi-1`. The grid is
  `(n+2)×(n+2)` at `base_a` and includes its boundary. Each point becomes
  `(N + S + W + E) >>> 2`. The thread keeps `dmaxL`, the largest change in
  the current row, and after every row it enters the critical region to
  update `dmax` at `base_c`.
- `K_AVG`: the worksharing loop `a[i] = (b[i] + b[i+1]) >>> 1` for *i* in
  `lo..hi-1`. b is at `base_a` and a at `base_c`. Each iteration is two loads
  and one store. When a task boundary falls inside a cache line of a, two
  threads write different words of that line. Each L1 writes back only its
  own dirty bytes, so neither overwrites the other's results.

When several threads run Gauss-Seidel, the result depends on timing. A thread
may see a neighbour's boundary row before or after that neighbour's update,
depending on when each one flushes. This is the nature of the parallel
algorithm, not a fault. It converges all the same.

## Interface and timing

All message ports use valid/ready. A message moves on a rising edge where
both are high. The payload types are in `omp_pkg`.

| top-level signal | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset |
| `start`, `cfg` | one-cycle start pulse; `cfg` is sampled with it |
| `done`, `busy` | `done` is a one-cycle pulse at the end of the run |
| `result`, `iterations` | valid from `done` until the next `start` |
| `l2_flush`, `l2_flush_done` | one-cycle request; `l2_flush_done` pulses when every dirty L2 line has been written |
| `mem_req_*`, `mem_rsp_*` | line port to a memory controller. `mem_req.we` = 1 writes a whole line and gets no answer. A read is answered by one `mem_rsp_valid` beat at any later time. |

Latencies:

- L1 hit: the answer arrives 2 cycles after the request is accepted.
- L2 hit: the answer arrives 2 cycles after the L2 accepts the request.
- P_synch: answers 1 cycle after a request.
- Networks: single-stage and combinational. They add no cycle of their own.

Identifiers: P0 and its L1 are 0; slave *i* and its L1 are *i*.

Parameters of `omp_accel_top` (the defaults are the configuration tested end
to end):

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | slave threads (the team size of the `num_threads(4)` example) |
| `NSYNCH` | 1 | P_synch ports, i.e. distinct synchronization identifiers |
| `L1_LINES` | 16 | lines per L1 (16 bytes each) |
| `L2_LINES` | 256 | lines in L2 (4 KiB) |
| `FIFO_DEPTH` | 2 | start requests a slave can queue |
| `NSUB` | 0 | subthreads per slave position; 0 is the single-level design |

The address space is 16-bit bytes (64 KiB). A problem fits if its arrays fit
in 16384 words: n·m + n + m for y = A x, 2n + 1 for the dot product, and
(n+2)² + 1 for Gauss-Seidel, so n ≤ 125, and 2n + 1 for the averaging loop.

## Departures and choices

These points are not fixed by the source architecture, or depart from it:

- **Networks.** The source suggests butterfly networks, and a torus for load
  balancing. Here all three networks are single-stage crossbars with
  round-robin arbitration, which follow the same delivery rules.
- **Slave threads.** They are simple sequential state machines making one
  memory access at a time, not deep pipelines.
- **Kernel selection.** The four kernels share one module, selected by the
  start request. A real application-specific build would contain only the
  kernel it needs.
- **Number formats.** The source's examples use floating point. This design
  uses integers, and divides by 4 and by 2 with arithmetic shifts.
- **Gauss-Seidel update formula.** The source does not spell it out. The
  standard 5-point average is used.
- **Critical region placement.** The critical region runs once per grid row.
  That follows the prose description of the algorithm. Its code listing
  seems to place the region after the row loop instead.
- **No lock port on P0.** P0 has no port to the synchronization network,
  since none of the kernels needs a critical region in P0.
- **Cache organisations.** Direct mapped, write-allocate, blocking, 16-byte
  lines. The sizes are the parameters above.
- **`flush_list` format.** Carried as one address per request, with a `last`
  flag.
- **L2 flush.** `l2_flush` is an addition, so that results can be read from
  memory.
- **Gauss-Seidel iteration limit.** `max_iter` is a safety limit of this
  design.
- **Nesting depth.** Nested parallelism stops at two levels.
- **Explicit barriers.** There is no dedicated barrier network. An explicit
  barrier is made the way the source suggests: end one fork-join region and
  start the next.
- **Not built:** the memory controller itself.

## Files

`rtl/`:

- `omp_pkg.sv`: message types
- `msg_fifo.sv`, `rr_arb.sv`: FIFO and round-robin arbiter helpers
- `master_thread.sv`, `slave_thread.sv`: P0 and the slave threads
- `task_net.sv`, `sync_net.sv`, `l1l2_net.sv`: the three networks
- `nested_master.sv`: the sub-master P_i-P0 used for nested parallelism
- `psynch.sv`: the lock unit
- `l1_cache.sv`, `l2_cache.sv`: the two cache levels
- `omp_accel_top.sv`: the top level

`tb/` has one self-checking testbench per block, `tb_<module>.sv`, and two
behavioural models: `offchip_mem_model.sv` (memory behind the controller
port) and `l1_port_model.sv` (a flat memory standing in for an L1 cache).

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a test that hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/omp_pkg.sv \
    tb/tb_omp_accel_top.sv --top-module tb_omp_accel_top -o sim
./obj_dir/sim
```

The other testbenches build the same way: replace the file and the module
name. The simulator finds each other module through `-Irtl -Itb` by its file
name.

`tb_omp_accel_top` runs the top level at its default parameters. It
executes, in order:

- y = A x (8×8) statically, then dynamically;
- a 32-element dot product in 16 load-balanced chunks;
- Gauss-Seidel on a 6×6 grid as one task, compared bit for bit with a
  sequential reference, including the number of sweeps;
- Gauss-Seidel on an 8×8 grid over 4 threads;
- the loop `a[i] = (b[i] + b[i+1]) / 2` for i = 0..999 under a static
  schedule, 250 iterations per thread, with all 1000 results compared.

Because the 4-thread run depends on timing, it is checked against
properties: the loop ended because dmax ≤ eps, the values stay within the
boundary range, and the residual of every point is small. The test also
counts how often each mechanism occurs, and fails if one never does:

- task-network stalls;
- static and load-balanced dispatch;
- reduction responses;
- partial-mask write-backs;
- `flush_list` and `flush_all`;
- L1 fills;
- L2 evictions and the L2 flush;
- lock grants and rejections.

The whole test takes well under a second of simulation time.

`tb_omp_accel_nested` runs the nested configuration: 2 positions × 2
subthreads, so 6 threads in all. It runs y = A x, a dot product and
Gauss-Seidel, and checks that subthreads received work and took the lock.
