# ROC: a rank-switching, open-row DRAM controller for time-predictable systems

In a multicore real-time system every core (requestor) shares one DRAM. To
bound a task's worst-case execution time you need a bound on how long each
of its memory requests can take, with every other requestor interfering as
badly as it can. Controllers built for average-case speed make that bound
very pessimistic. Predictable controllers usually fix the latency by closing
the row after every access. That gives up row hits, and it still pays the
DRAM's worst turnaround: a read that follows a write in the same rank must
wait for the write-to-read time (tWTR) after the write data.

ROC attacks that worst case. The DRAM is split into several **ranks** that
share the command and data buses. A write in one rank followed by a read in
*another* rank only needs a short rank-to-rank gap (tRTR, two cycles) on the
data bus, not the write-to-read turnaround. ROC therefore makes the column
commands (CAS: RD or WR) **alternate among ranks**. Each requestor owns
**private banks**, so no other requestor can close its row. That makes an
**open-row** policy safe: a row hit costs only a CAS.

Here is a write-read-write-read sequence (four row hits, from four
requestors) on a DDR3-1333H device, spread over one, two or four ranks:

| ranks | published cycles, first CAS to end of last data | this RTL |
|-------|-----------------------------------|----------|
| 1     | 52 | 37: the round robin inside the rank serves the second write while the read waits for write-to-read (W W R R); the published figure assumes arrival order |
| 2     | 35 | 35 |
| 4     | 29 | 29, cycle for cycle |

This repository is a synthesizable SystemVerilog model of that controller:
front ends, back end with its three arbitration levels, timing trackers and
the data path. It also holds self-checking testbenches and a behavioural
DDR3 model that checks every DRAM rule.

## Organisation

```
 requestor g ──► roc_front_end ──► roc_cmd_queue ─┐       (one per requestor)
                                                  │
            ┌──────────── roc_back_end ───────────┴─────────────────────┐
            │ per rank r: roc_rank_timing ─► roc_l3_arbiter (P/A, CAS)  │
            │ shared:     roc_bus_timing  ─┘                            │
            │ roc_l2_arbiter (P/A, CAS over ranks) ─► roc_l1_arbiter ─► │──► cmd_o
            └───────────────────────────────────────────────────────────┘
 roc_data_path: drives dq_out tWL after a WR, captures dq_in tRL after a RD,
                returns resp_* to the requestor
```

Requestor `g` lives in rank `g / M` and owns bank `g % M` of that rank. The
default is `NR = 4` ranks and `M = 2` requestors per rank: eight requestors
with a 64-bit data bus.

### Front end (`roc_front_end`)

One per requestor. It remembers the row left open in its private bank and
turns each request into commands:

| situation                 | commands pushed      |
|---------------------------|----------------------|
| row hit                   | CAS                  |
| bank idle (after reset)   | ACT, CAS             |
| row miss                  | PRE, ACT, CAS        |

It pushes one command per cycle, starting the cycle after the request is
taken, so its delay is constant. A requestor has one request in flight.
`req_ready` stays low until the data transfer ends, and only goes high when
the queue has room for a whole sequence (three entries).

### Back end (`roc_back_end`): three arbitration levels

This is the heart of the design. Every cycle at most one command goes on
the command bus. Only the head of each requestor's queue can compete, so a
requestor's commands stay in order.

1. **Legality.** A head takes part only if DRAM timing allows it in this
   cycle. `roc_rank_timing` (one per rank) keeps a countdown for each
   constraint:
   - per bank: tRP, tRC, tRCD, tRAS, tRTP and write recovery;
   - per rank: tRRD, the four-activate window tFAW, tCCD, write-to-read and
     read-to-write.

   `roc_bus_timing` (shared) knows when the data bus is free and which rank
   used it last. A CAS with data latency L (tRL for a read, tWL for a write)
   is allowed when `L >= busy + (other rank ? tRTR : 0)`.
2. **Level 3, inside a rank** (`roc_l3_arbiter`). There are two round-robin
   arbiters: one over the ready PRE/ACT heads and one over the ready CAS
   heads. A pointer moves past a requestor only when its command really
   issues, so the requestors of a rank take turns. A CAS that the rank's
   timing allows but the data bus does not yet allow keeps its turn: the
   rank then offers no CAS at all (see the bus hold below).
3. **Level 2, across ranks** (`roc_l2_arbiter`). The same pair of
   round-robin arbiters works over the ranks' Level 3 candidates, so the
   ranks take turns. A requestor's latency therefore depends on the number
   of ranks and on the requestors of its own rank, but not on what the other
   ranks do. That isolation lets hard real-time requestors have ranks of
   their own.
4. **Level 1** (`roc_l1_arbiter`). A CAS always beats a PRE/ACT, because
   CASes compete for the data bus. A PRE/ACT that loses only waits one
   cycle.

The winner is popped, updates the timing trackers and is registered onto
`cmd_o`. Every constraint is counted from that register. The device model
sees exactly the same cycles, so the rules hold at the pins.

#### The rank-switching rule and the bus hold

Suppose it is rank A's turn at Level 2, but its CAS cannot go yet.

* **A is held back by its own timing** (typically write-to-read after its own
  write). A is skipped, and the next rank with a ready CAS issues. That rank
  may issue more than once while A waits, and A keeps its turn. `reorder`
  pulses when this happens. This is the rank switching that turns the long
  write-to-read wait into useful bus time.
* **A is held back only by the shared data bus.** No CAS issues until A's can.
  This hold is this design's own reading of the rule. Without it, a write
  (tWL = 7) can starve: reads (tRL = 9) keep fitting into a data bus the
  write never fits into. The same holds inside a rank, so Level 3 applies
  the same hold to the requestor at its CAS pointer. Without the holds,
  simulation showed single requests waiting 400 to 950 cycles. With both,
  the worst request latency seen at the default size is 55 to 74 cycles
  over all row-hit ratios (table below).

When every rank always has a ready read, CASes issue every tBUS + tRTR = 6
cycles, in strict rank order 0, 1, 2, 3, 0, … Each rank alternates between
its two requestors. The data bus is then busy except for the rank-to-rank
gap. The back-end testbench checks these three properties.

### Data path (`roc_data_path`)

A delay line of depth tRL + tBUS records, for each recent cycle, whether a
CAS went out and for which requestor. Beat `j` of the burst of a command
sent `d` cycles ago is found at entry `lat - 1 + j`. Here `lat` is tWL or
tRL. The data bus carries two `DQ_W`-bit beats per cycle (double data rate).
A burst of length 8 therefore takes tBUS = 4 cycles and moves a 512-bit
line. The response (`resp_valid`, requestor, direction, read line) comes one
cycle after the last beat. It also releases the requestor's front end.

## Timing

* A row-hit request taken at cycle t puts its CAS on `cmd_o` at t+3 at the
  earliest: front-end register, queue, then command register. Row misses
  add the PRE and ACT with their tRP and tRCD waits.
* Data moves tWL (write) or tRL (read) cycles after the CAS appears on
  `cmd_o`, for tBUS cycles. `resp_valid` follows one cycle later.
* Default timing, `roc_pkg::DDR3_1333H`, in DRAM clock cycles: tRCD 9, tRP 9,
  tRAS 24, tRC 33, tRRD 4, tFAW 20, tRL 9, tWL 7, tBUS 4, tCCD 4, tWR 10,
  tWTR 5, tRTP 5, tRTR 2. The controller clock is the DRAM clock (tCK 1.5 ns).

## Parameters

| module     | parameter | default      | meaning |
|------------|-----------|--------------|---------|
| `roc_top`  | `NR`      | 4            | ranks (the four-rank configuration, ROC-4) |
|            | `M`       | 2            | requestors per rank (8 in total) |
|            | `QDEPTH`  | 4            | command queue entries per requestor (this design's choice, at most 7) |
|            | `DQ_W`    | 64           | data bus width; 32 is the other published configuration |
|            | `T`       | `DDR3_1333H` | timing set (`roc_pkg::timing_t`) |

`NR` can be at most 4 (`RANK_W = 2`) and `M` at most 8 (`BANK_W = 3`). The
two-rank configuration (ROC-2) is `NR = 2, M = 4`.

## Interfaces of `roc_top`

* Requests, per requestor: `req_valid`/`req_ready` handshake, `req_we`,
  `req_row` (15 bits), `req_col` (10 bits), `req_wdata` (one line). Rank and
  bank are implied by the requestor index.
* Responses, shared: `resp_valid`, `resp_req`, `resp_we`, `resp_rdata`.
* DRAM: `cmd_o` (`bus_cmd_t`: valid, kind, rank, bank, row, column; NOP when
  idle), `dq_out`/`dq_oe` toward the device and `dq_in` back, two beats per
  cycle. There is no PHY: these are cycle-level buses.
* Event strobes for measurement: `ev_hit`, `ev_miss` (per requestor),
  `ev_rank_switch` (a CAS to another rank than the previous CAS),
  `ev_reorder` (a CAS overtook a waiting rank), `ev_pa_deferred` (a ready
  PRE/ACT lost to a CAS).

## What follows the published design, and what is this design's own

Follows the published design:
* the front end / back end split;
* open-row policy with private banks;
* per-requestor command queues grouped by rank;
* Level 3 (requestors of a rank) and Level 2 (ranks), each with separate
  PRE/ACT and CAS arbiters;
* Level 1 priority of CAS over PRE/ACT;
* CAS rank switching while a rank waits for write-to-read;
* DDR3-1333H, 64/32-bit data bus, eight requestors, two or four ranks.

This design's own choices:
* the cycle values of the timing constraints (JEDEC DDR3-1333H; they match
  the published 29-cycle example);
* the hold of all CASes while the rank whose turn it is waits only for the
  data bus, and the same hold inside a rank for the requestor whose turn it
  is;
* Level 3 passes over a requestor whose CAS waits for its rank's own timing
  (this is why one rank runs the example in 37 cycles rather than 52);
* the bank mapping `g -> (g / M, g % M)`;
* one outstanding request per requestor;
* queue depth 4;
* the three pipeline stages: front-end register, arbitration, command
  register. The published controller is also a three-stage pipeline, but
  its stages are not described;
* the data path and response format;
* no refresh.

Not built:
* the DRAM device, the PHY and the requestors. The testbenches use a
  behavioural DDR3 model, `tb/ddr3_model.sv`, in place of the device;
* soft-requestor optimisations and shared data (described as future work);
* different numbers of requestors per rank. The analysis allows a count per
  rank; here every rank has `M`. A requestor that never sends requests
  stands in for a missing one;
* the worst-case latency analysis itself. The RTL shows the arbitration the
  analysis assumes, but nothing here computes bounds.

Published results this RTL was not run against:
* the published latency curves. Those are analytical worst-case bounds;
  the testbenches here measure latencies under random traffic, which is a
  different quantity (see the table below);
* the CHStone trace results. Their traces are not available here.

## Verification

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=F`.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_roc_cmd_queue`   | random push/pop against a reference queue |
| `tb_roc_front_end`   | command sequences for hit / idle / miss, one per cycle, waiting for `done`, back-pressure |
| `tb_roc_rank_timing` | every `*_ok` output, every cycle, against legality computed from absolute timestamps, with random legal streams |
| `tb_roc_bus_timing`  | data-bus permissions against a reference end-of-burst time with the rank-to-rank gap |
| `tb_roc_l3_arbiter`, `tb_roc_l2_arbiter`, `tb_roc_l1_arbiter` | grants against reference round-robin pointers; hold and reorder; CAS priority |
| `tb_roc_back_end`    | default size, driven with command sequences; the DDR3 model checks all rules; per-requestor order; in saturation: rank rotation, requestor alternation, CAS every tBUS+tRTR cycles; backlogged reads and writes: no gap between data bursts longer than tRTR; a phase that forces CAS reordering |
| `tb_roc_data_path`   | write beats and read capture at exact cycles, response timing and contents |
| `tb_roc_top`         | whole controller at its default parameters, against the DDR3 model |
| `tb_roc_configs`     | the controller at the other published configurations, side by side (see below) |

`tb_roc_top` runs in three phases:
1. It opens a row in each rank.
2. It replays the four-rank write-read-write-read example and checks the
   29 cycles.
3. It runs 400 random requests per requestor, 20% of them writes, and
   checks every read line against a reference memory.

At the end it requires no DRAM rule violations. It also requires that row
hits, row misses, rank switches, CAS reorders and PRE/ACT deferrals each
happened at least once.

`tb_roc_configs` instantiates `tb/roc_top_run.sv` (controller, DDR3 model and
scenario, with its own clock) once per configuration. It runs the example
on one rank (expects 37 cycles) and on two ranks (expects 35). It also runs
the synthetic workload of eight requestors with 20% writes at row-hit
ratios of 0 to 100%, in three configurations: four ranks with a 64-bit bus,
two ranks of four requestors with a 64-bit bus, and four ranks with a
32-bit bus. For the 32-bit bus a 64-byte line takes tBUS = 8 cycles. Read
data, DRAM rules and completion are checked in every run. It also requires
that the worst latency over the sweep is lower on four ranks than on two,
and that the 32-bit bus has a higher mean latency than the 64-bit one at
every ratio. One run gave these worst request
latencies (cycles, from the request being taken to its response):

| row hits | 4 ranks, 64-bit | 2 ranks, 64-bit | 4 ranks, 32-bit |
|----------|-----------------|-----------------|-----------------|
| 0%       | 74              | 110             | 107             |
| 25%      | 73              | 130             | 90              |
| 50%      | 70              | 89              | 90              |
| 75%      | 55              | 120             | 89              |
| 100%     | 55              | 106             | 90              |

Running a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/roc_pkg.sv tb/roc_tb_pkg.sv tb/tb_roc_top.sv --top-module tb_roc_top
./obj_dir/Vtb_roc_top
```

Verilator finds the other modules through `-I` (one module per file, the
file named after the module). The testbenches use `$urandom`. Every
register that is read is reset, because a two-state simulator starts
unreset variables at random values.

## Files

* `rtl/roc_pkg.sv`: command kinds, queue entry and bus command structs,
  the timing struct and its DDR3-1333H default, and the countdown update
  function.
* `rtl/roc_top.sv`, `roc_front_end.sv`, `roc_cmd_queue.sv`,
  `roc_back_end.sv`, `roc_rank_timing.sv`, `roc_bus_timing.sv`,
  `roc_l3_arbiter.sv`, `roc_l2_arbiter.sv`, `roc_l1_arbiter.sv`,
  `roc_rr_arbiter.sv` (the round-robin building block),
  `roc_data_path.sv`.
* `tb/ddr3_model.sv`: behavioural multi-rank DDR3 with a rule checker.
* `tb/roc_top_run.sv`: one parameterised controller-plus-device run, used by
  `tb_roc_configs`.
  `tb/roc_tb_pkg.sv` gives the initial contents of never-written locations.
