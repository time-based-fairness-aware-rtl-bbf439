# TB-LMI: a fairness-aware DRAM scheduler for multicore processors

When several cores share one DRAM, the memory controller decides whose miss
is served next. A controller that always serves row-buffer hits first gets
the most bandwidth out of the DRAM. But it lets a few memory-hungry threads
monopolise the banks, while threads that miss rarely wait behind them and
slow down badly. TB-LMI ("Time-Based Least Memory Intensive") fixes this with
time-sliced profiling. Every *schedule quantum* (SQ, 1M cycles), the
controllers count how many DRAM accesses each thread has received. The
threads are then ranked, the least memory-intensive first. For the next
quantum every bank gives priority to the highest-ranked threads, with one
exception: a bounded number of row-buffer hits may go first. Light threads
therefore get through quickly, and heavy threads still keep most of their
row locality.

This repository holds synthesizable SystemVerilog for the scheduler as a
memory subsystem: one controller per bank plus a central "Meta" controller.
It is set up for 8 cores (one thread each) and 4 DRAM banks.

```
             L2 misses (thread ID, address)          flush (every 100M instr.)
                  |                                        |
          route by bank bits                               v
     +--------+--------+--------+            +---------------------------+
     v        v        v        v            |     meta_mem_ctrl         |
 +--------+ +--------+ +--------+ +--------+ |  sq_timer  (SQ register) |
 | bank 0 | | bank 1 | | bank 2 | | bank 3 | |  tma       (totals)      |
 |  ctrl  | |  ctrl  | |  ctrl  | |  ctrl  | |  priority_rank           |
 +--------+ +--------+ +--------+ +--------+ |  Meta-TPSR               |
   | TMAPB counts, every quantum ----------->|                          |
   |<---------------- TPSR broadcast --------|                          |
                                             +---------------------------+
```

## The bank controller: choosing the next request

Each bank behaves like an independent memory (`bank_mem_ctrl`). Requests for
it wait in an 8-entry queue (`bank_queue`), kept in arrival order. Whenever
the bank is free and something waits, `tblmi_select` picks one request. That
decision is combinational, so scheduling costs no cycle of its own. The
rules are:

1. **Warm-up quantum.** Right after reset nothing is known about the threads.
   The bank serves the oldest request (plain FCFS) until the first ranking
   arrives.
2. **Level 1, first-ready.** The oldest request whose row is the one open in
   the bank's row buffer (a row hit). A request's "first-ready" bit is just
   `row == open_row`. It is computed from the open row rather than stored in
   the queue.
3. **Level 2, thread priority.** If no row hit waits, the bank reads its TPSR
   (thread priority register) and takes the oldest request of the
   highest-ranked thread that has anything queued. Rank 0 is the thread with
   the fewest accesses so far.

**First-ready threshold (FRT).** Level 1 may win at most FRT times in a row
(FRT = 1 by default). After that run, the next decision goes to level 2,
restricted to requests that are *not* row hits whenever any such request
waits. So a waiting row-conflict request gets its turn even while a stream of
hits keeps arriving. The run then starts again. A small counter of
successive level-1 picks implements this; at FRT = 1 it is one flip-flop.
FRT = 0 turns level 1 off completely, and a very large FRT gives classic
hit-first behaviour.

Every scheduled request increments its thread's counter in the bank's
`tmapb` (thread memory accesses per bank) block. These counts go to the Meta
controller at each quantum end, and the counters restart from zero.

## The DRAM bank model

`bank_timing` holds the row-buffer state (IDLE after reset, or ACTIVE with an
open row). It classifies each access as a **hit**, **closed** or
**conflict** access and keeps the bank busy for **108, 140 or 216 cycles**
respectively. It is not pipelined: one access at a time. The next access may
be chosen in the last cycle of the current one, so back-to-back accesses
start exactly *latency* cycles apart. The policy is open-page: a row stays
open after its access until another row is needed. The DRAM array and its
data path are outside this design; `done`/`done_req` mark the point where
read data would return to the cache.

## The Meta controller: quanta, totals and ranking

`meta_mem_ctrl` is the only place where the banks' views meet.

- **SQ register (`sq_timer`).** A 20-bit counter that wraps every SQ
  = 1,000,000 cycles. A quantum ends when the counter reads zero again,
  detected as the NOR of its bits. The first quantum is the warm-up, which
  here is also 1M cycles long.
- **TMA totals (`tma`).** One 34-bit running total per thread. At each
  quantum end, all banks' TMAPB counts are added in. `flush` clears the
  totals; the processor raises it every 100 million instructions, so that
  old behaviour is forgotten.
- **Ranking (`priority_rank`).** The position of each thread is the number of
  threads with a smaller total, or with an equal total and a lower thread
  ID. One comparator per pair of threads, 28 for 8 threads. The thread IDs are
  packed into the 24-bit Meta-TPSR, highest priority in the most significant
  3 bits.
- **Broadcast.** The word is copied into every bank's `tpsr`.

Sequence at a quantum end (cycle 0 is the cycle `q_end` is high):

| cycle | what happens |
|------:|--------------|
| 0 | banks present their TMAPB counts; at the edge they clear them and TMA adds them |
| 1 | the ranking of the new totals is written to Meta-TPSR |
| 2 | `bcast_load`: every bank loads its TPSR at the edge; after the first broadcast the banks leave FCFS |
| 3+ | banks schedule with the new ranking |

The banks never wait for the ranking; they use the previous one until the
new one lands.

**Worked example** (4 threads, two banks). After warm-up the banks count
(10, 2, 21, 15) and (2, 6, 10, 12) accesses for threads 1..4. The totals are
then 12, 8, 31, 27, and the priority order is 2, 1, 4, 3. After the next
quantum the totals are 24, 35, 45, 30, and the order becomes 1, 4, 2, 3.
Both steps are checked by `tb_meta_mem_ctrl` and `tb_priority_rank`.

## Register sizes

| register | where | width | rule |
|---|---|---|---|
| TMAPB | per thread, per bank | 14 | ceil(log2(SQ / hit latency)) = ceil(log2(1e6/108)) |
| TPSR / Meta-TPSR | per bank / Meta | 24 | threads × log2(threads) |
| SQ register | Meta | 20 | enough for 1M cycles |
| TMA | per thread, Meta | 34 | ceil(log2(hit latency × 1e8 instructions)) |
| thread ID | per request | 3 | log2(threads) |

Counters saturate instead of wrapping. The widths already cover the worst
case, so this only matters if the parameters are pushed.

After synthesis with yosys at the default sizes, the whole system is about
1,730 word-level cells and 1,712 flip-flop bits. The four 8-entry queues
account for most of the flip-flops.

## Top-level interface (`tblmi_mem_system`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `req_valid`, `req_tid[2:0]`, `req_addr[14:0]`, `req_we`, `req_tag[5:0]` | in | one L2 miss per cycle: thread, cache-block address, write-back flag, requester tag |
| `req_ready` | out | low while the addressed bank's queue is full; the L2 must hold the request (the stall reaches back to the cores) |
| `flush` | in | clear the TMA history |
| `iss_valid/iss_req/iss_kind/iss_pick` [4] | out | per bank: a request left the queue and its access started, with its row-buffer class and the rule that chose it |
| `done/done_req` [4] | out | per bank: that access finished |
| `q_count`, `bank_tpsr`, `meta_tpsr`, `tma_total`, `q_end`, `fcfs_mode` | out | observation |

Address map (block address, 64-byte blocks): `{row[7:0], bank[1:0], col[4:0]}`.
Consecutive blocks stay in one row of one bank. A request is accepted at the
clock edge where `req_valid && req_ready`. It can be scheduled from the next
cycle on.

Parameters of the top, with defaults: `QDEPTH=8`, `T_HIT=108`,
`T_CLOSED=140`, `T_CONFLICT=216`, `FRT=1`, `SQ=1000000`, `WARMUP=1000000`,
`TMAPB_W=14`, `TMA_W=34`. The thread count, bank count and address field
widths set the request format. They are constants in `rtl/tblmi_pkg.sv`.

## Where this design makes its own choices

The scheduling rules, the latencies, the register set and their sizes, the
quantum length, the FRT definition and the 8-entry queue are those of the
TB-LMI scheme. The following are this implementation's own:

- **Structure.** The ranking is done by a comparator network inside the Meta
  controller. The scheme leaves open doing it in software on an idle core.
- **Timing.** The two-cycle quantum-end sequence above, and a warm-up as long
  as SQ.
- **Memory geometry.** 256 rows per bank and 32 blocks per row, with the
  address map above.
- **Queue behaviour.** A full queue refuses a new request even in a cycle
  where it also issues one.
- **Ranking and FRT.** Ties in the ranking go to the lower thread ID. After
  a run of FRT hits, a non-hit request is preferred if one waits.
- **Reset, flush and counters.**
  - The TPSR resets to the order 0..7.
  - A flush in the same cycle as a quantum end keeps only the ending
    quantum's counts.
  - Counters saturate.
- **Not handled.** Reads and writes are treated alike; the write bit is only
  carried along. There is no refresh and no DRAM command-level timing
  (RAS/CAS/precharge); each access is one lump of latency.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end. Build any of them with Verilator
5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/tblmi_pkg.sv tb/tb_tblmi_mem_system.sv --top-module tb_tblmi_mem_system
./obj_dir/Vtb_tblmi_mem_system
```

- **`tb_tblmi_mem_system`: the full design at its default parameters.**
  - Setup: 1M-cycle quanta, covering the warm-up and two quanta (3M cycles,
    about 6 s). A traffic generator plays 8 threads; threads 0–3 are memory
    intensive with streaming rows, threads 4–7 miss rarely.
  - Checking: a cycle-level reference model of every bank and of the Meta
    controller checks each scheduled request, its rule, its row class, each
    completion, every stall, each quantum end, the TMA totals and all TPSR
    words (45 million checks).
  - Mechanisms seen in one run: 20,056 FCFS, 14,784 level-1 and 26,553
    level-2 picks; 10,573 FRT cut-offs; 1.2M stalled L2 cycles; 23,552 hit,
    4 closed and 37,837 conflict accesses; 3 quantum ends and broadcasts; 2
    ranking changes; 1 flush. After warm-up the light threads rank first.
- **`tb_tblmi_workloads`: the evaluated workload classes with synthetic
  traffic.**
  - Classes: 8-core "mem" (all threads intensive) and "mix" (half
    intensive), and the same for 4 cores (thread IDs 4–7 idle). Queues of 8
    and 32 entries are used, plus 16 for 4-core mix, with quanta shortened
    to 50k cycles.
  - Besides the reference checks, it verifies three things:
    - No thread starves.
    - Light and idle threads rank ahead of heavy ones.
    - Light threads wait less in the queues. In 8-core mix with 8 entries,
      the average wait is about 180 cycles for light threads against 840
      for heavy ones.
  - Equally heavy threads are served within a factor of two of each other.
- **`tb_bank_mem_ctrl`.** Runs one bank controller at FRT = 1, 2 and 0
  against a reference model.
- **Unit tests.** The other testbenches cover the smaller blocks. This
  includes the exact 108/140/216-cycle latencies, 1M-cycle quantum ends at
  full size, and the worked example above.

To study other configurations, change the top's parameters. Examples are
16/24/32-entry queues, another SQ with `TMAPB_W` set to
`ceil(log2(SQ/T_HIT))`, or another FRT. The thread and bank counts are
changed in the package.

## Files

| file | block |
|---|---|
| `rtl/tblmi_pkg.sv` | constants, request struct, enums |
| `rtl/tblmi_mem_system.sv` | top: routing, 4 bank controllers, Meta controller |
| `rtl/bank_mem_ctrl.sv` | one bank's controller, FRT counter |
| `rtl/bank_queue.sv` | arrival-ordered queue, any entry removable |
| `rtl/tblmi_select.sv` | FCFS / level 1 / level 2 selection |
| `rtl/bank_timing.sv` | row buffer state and access latency |
| `rtl/tmapb.sv` | per-bank per-thread access counters |
| `rtl/tpsr.sv` | priority register and rank decode |
| `rtl/meta_mem_ctrl.sv` | Meta controller |
| `rtl/sq_timer.sv` | SQ register, warm-up flag |
| `rtl/tma.sv` | per-thread totals, flush |
| `rtl/priority_rank.sv` | ascending ranking into TPSR layout |
