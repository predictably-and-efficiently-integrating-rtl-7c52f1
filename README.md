# PCC: predictable multi-core memory with stock snooping coherence

Real-time multi-cores need a bound on how long any memory request can take.
Standard snooping protocols (MSI, MESI, MOESI) behave badly under a
predictable arbiter such as TDM: a request can be interrupted halfway by
another core's request to the same line, a write-back can be pushed into a
later slot, and the latency then grows with the amount of sharing.

This design avoids that without changing the protocol. It relies on two
properties of the bus:

1. **One granted request is served to completion.** Once the arbiter grants
   a core, that core's coherence message is broadcast. The single data
   transfer the message needs then follows at once. Nothing else uses the
   bus until both are done.
2. **One data message can go to two places.** An owner cache sends the line
   straight to the requester, and in the same data phase the line can also
   be written into shared memory. A GetS of a modified line under MSI/MESI
   is the case that needs both.

So every request costs at most one *access* of `L_acc` cycles, and the
worst-case latency of a request is

    WCL_perReq = WCL_arb + L_acc

Here `WCL_arb` depends only on the arbiter and the core count. It does not
depend on the protocol, the data sharing, or whether a core is in-order or
out-of-order.

The RTL is a complete, parameterised memory system. It has N private L1
caches with coherence controllers, the unified snooping bus, four selectable
predictable arbiters, and a shared memory. The cores are not part of it:
their load/store ports are the top-level ports.

## Block structure

```
 core 0 .. core N-1  (outside: ports of pcc_top)
    |  valid/ready request, 1-cycle response pulse
 pcc_l1_cache x N   -- pcc_req_fifo (per-core request buffer, 8 deep)
    |  bus_req / gnt / done          ^ snoop / snoop_commit / snoop_resp
 pcc_bus  (request phase 4 cycles, data phase 50 cycles)
    |  arb_req / bus_free / gnt          |  read / write port
 pcc_bus_arbiter                      pcc_shared_mem
   = pcc_tdm_arbiter | pcc_rr_arbiter | pcc_wrr_arbiter | pcc_hrr_arbiter
```

| File | Contents |
|---|---|
| `rtl/pcc_pkg.sv` | Types (`core_req_t`, `bus_req_t`, `snoop_t`, `snoop_resp_t`), the geometry (32-bit addresses, 32-bit words, 64-byte lines), and all protocol tables as functions |
| `rtl/pcc_l1_cache.sv` | Direct-mapped write-back, write-allocate L1 with its coherence controller and request buffer |
| `rtl/pcc_req_fifo.sv` | Fall-through FIFO used as the per-core outstanding-request buffer |
| `rtl/pcc_bus.sv` | Unified bus: broadcast, snoop-response combine, data routing, overlapped write-back |
| `rtl/pcc_bus_arbiter.sv` | Picks one of the four arbiters with the `ARB` parameter |
| `rtl/pcc_{tdm,rr,wrr,hrr}_arbiter.sv` | The arbiters |
| `rtl/pcc_shared_mem.sv` | Shared memory / perfect last-level cache, cleared after reset |
| `rtl/pcc_top.sv` | The whole system |

## The transaction on the bus

The central rule is that the bus never holds two transactions. A transaction
runs in these steps:

| Cycle (0 = grant) | What happens |
|---|---|
| 0 | The arbiter grants core *i* (`gnt_valid`, `gnt_id`). The bus latches the core's message: command, line address and, for PutM, the line. |
| 1 .. REQ_LAT | **Request phase.** The message is shown to every other cache (`snoop[j]`; core *i* sees nothing). The shared-memory read starts in cycle 1. In the last cycle (`snoop_commit`) the snoop responses are combined by wired-OR: `shared`, `owner`, `wb`. The owner's line is taken, and every snooper moves its copy to the protocol's next state. |
| REQ_LAT+1 .. REQ_LAT+DATA_LAT | **Data phase.** This is skipped for an upgrade. The data comes from, in order: the requester's own line for PutM; the owner cache if one answered (cache-to-cache transfer); otherwise the shared memory. In the last cycle the requester gets `done`, the data and the `others shared` flag. If `wb` was raised, or the command is PutM, the same line is written into shared memory in that cycle. |

`bus_free` is high in the last cycle of a transaction. This lets the next
grant come in the very next cycle, so back-to-back transactions start every
`L_acc = REQ_LAT + DATA_LAT = 54` cycles. An upgrade takes only
`REQ_LAT` cycles.

A snooper changes state exactly once, at `snoop_commit`, and no other
message can arrive before the transaction ends. A cache therefore never has
a pending response while it is itself on the bus. The separate
request/response arbitration layer that other predictable designs need is
not needed here.

## Coherence protocols

The protocols are the standard stable-state MSI, MESI and MOESI. The
transient states are not stored. A core has at most one bus transaction in
flight, and the controller's own three-state FSM
(`S_IDLE → S_WAIT_GNT → S_WAIT_DONE`) stands in for them.

Requester side:

| Access | Line state | Action |
|---|---|---|
| load | S, E, O, M | hit, 1 cycle |
| store | M | hit |
| store | E (MESI, MOESI) | hit, silent E→M |
| store | S, or O (MOESI) | **Upg**: broadcast only, no data phase, → M |
| load | I / other tag | **GetS** → S, or → E if no other cache shares it (MESI, MOESI) |
| store | I / other tag | **GetM** → M |
| any miss | victim in E, O or M | first a **PutM** of the victim (line goes to shared memory, → I), then the miss is arbitrated again |
| any miss | victim in S | dropped silently |

Snooper side, applied at `snoop_commit`:

| Snooped | State | Supplies data (`owner`) | Also to memory (`wb`) | Next |
|---|---|---|---|---|
| GetS | M | yes | MSI/MESI yes, MOESI no | MSI/MESI S, MOESI O |
| GetS | E | MESI/MOESI yes | no | S |
| GetS | O | yes | no | O |
| GetS | S | no | no | S |
| GetM | M / E / O | yes | no | I |
| GetM, Upg | S | no | no | I |
| PutM | any | no | no | unchanged |

The bus asserts that at most one cache claims ownership.

The message for a miss is chosen in the **grant cycle**, from the line state
as it is at that moment, not when the miss was first seen. For example, a
core that waits to upgrade an S line but loses the line to another core's
GetM will send a GetM instead. A core that waits while its own victim is
downgraded from M to O still writes it back.

## Arbiters

All arbiters grant only when `bus_free` is high. They are work-conserving
apart from TDM. `W_i` are the weights (default `{4,2,1,1}`), and `HP = ΣW`.

| Arbiter | Rule | WCL_arb of core *j* |
|---|---|---|
| TDM | Slot of `SLOT` (= L_acc) cycles per core in turn. The owner may start a transaction only in the first cycle of its own slot. An idle slot is wasted. | `N · SLOT` |
| RR | Next requesting core after the last one granted | `(N−1) · L_acc` |
| WRR | The current core keeps the bus for up to `W_cur` back-to-back grants while it requests; then, or as soon as it stops requesting, the turn passes to the next requesting core | `Σ_{i≠j} W_i · L_acc` |
| HRR | A table of `HP` entries is scanned from a pointer. The first entry whose core requests is granted, and the pointer moves past it. | `(⌈HP/W_j⌉ − 1) · L_acc` |

The HRR table is built at elaboration. Cores are placed in order of falling
weight: each takes the first free entry and then every `HP/W` entries after
it. For `{4,2,1,1}` the table is `0 1 0 2 0 1 0 3`, so core 0 waits behind
at most one other request.

With the defaults (N = 4, L_acc = 54) the bounds are:

| | core 0 | core 1 | core 2 | core 3 |
|---|---|---|---|---|
| TDM | 270 | 270 | 270 | 270 |
| RR | 216 | 216 | 216 | 216 |
| WRR | 270 | 378 | 432 | 432 |
| HRR | 108 | 216 | 432 | 432 |

(WCL_perReq in cycles, which is WCL_arb + 54.)

## Latency seen at the core port

A request is measured from the cycle it reaches the head of its core's
buffer. The timings are:

- **Hit:** the response pulse comes one cycle later. If a snoop commits a
  change to the same set in that cycle, the hit waits one more cycle.
- **Miss:** at most `WCL_arb + L_acc + 2` cycles. One cycle is lost to
  raise the bus request and one to register the response.
- **Miss that must first write back its victim:** at most
  `2·(WCL_arb + L_acc) + 3` cycles. The write-back arbitrates in the core's
  own turn like any request, which is the "every request may carry a dirty
  eviction" term of the task-level bound `WCML = 2·R_T·WCL_perReq`. Under
  MESI/MOESI, E lines also send a PutM.

Requests behind the head wait in the buffer (up to `Q_DEPTH` = 8
outstanding). That queueing does not change the bound of the head request,
nor the interference on other cores: the arbiter gives each core its turn no
matter how many requests it has queued. `core_req_ready` falls when the
buffer is full.

## Top-level interface

`pcc_top` parameters (defaults are the evaluated system):

| Parameter | Default | Meaning |
|---|---|---|
| `N_CORES` | 4 | cores / L1 caches |
| `PROTO` | `PROTO_MSI` | `PROTO_MSI`, `PROTO_MESI`, `PROTO_MOESI` |
| `ARB` | `ARB_TDM` | `ARB_TDM`, `ARB_RR`, `ARB_WRR`, `ARB_HRR` |
| `L1_SETS` | 256 | 256 × 64 B = 16 KB direct-mapped |
| `Q_DEPTH` | 8 | outstanding requests per core |
| `REQ_LAT`, `DATA_LAT` | 4, 50 | request / data phase cycles |
| `SLOT` | 54 | TDM slot, at least `REQ_LAT + DATA_LAT` |
| `WEIGHTS` | `{4,2,1,1}` | WRR / HRR weights |
| `SM_LINES` | 4096 | shared memory, 4096 × 64 B = 256 KB |

Per core *c*, there is a request channel `core_req_valid[c]` /
`core_req_ready[c]` / `core_req[c]` (`we`, byte `addr`, `wdata`; one 32-bit
word). A request is taken when valid and ready are both high at the clock
edge. Responses come as a one-cycle pulse `core_resp_valid[c]` with
`core_resp_rdata[c]`, in request order. A store returns the value it wrote.

`init_done` rises once the shared memory has been cleared, one line per
cycle after reset. Requests may be queued earlier, but the arbiter starts
only then. `obs_c2c` and `obs_wb` flag, in a transaction's last cycle, a
cache-to-cache transfer and an overlapped write-back; they are for
statistics.

Reset is synchronous and active low (`rst_n`). It invalidates all L1 lines
and empties all buffers.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

- **Arbiters** (`tb_pcc_*_arbiter`): random request patterns against a bus
  model and a reference model of the policy written in the bench. They check
  every grant and check the measured wait of every request against its
  WCL_arb. WRR also checks that a heavy core really gets back-to-back
  grants.
- **Bus** (`tb_pcc_bus`): 200 random transactions with modelled snoopers,
  checking every phase boundary at 4 + 50 cycles, the data source, the
  overlapped write-back and the snoop masking.
- **L1** (`tb_pcc_l1_cache`): one directed sequence run on an MSI, a MESI
  and a MOESI instance. It covers every row of the tables above: hits,
  silent E→M, Upg, GetS/GetM, PutM of M/E/O victims, and snoop downgrades
  and invalidations.
- **FIFO, shared memory**: their own small benches.
- **System** (`tb_pcc_top`): all 12 protocol × arbiter pairs side by side,
  with small caches (4 sets) and a short data phase (10 cycles) so that
  sharing, evictions and waiting are frequent. Random loads and stores come
  from 4 cores, with up to 2 outstanding each, over a small pool of shared
  lines. Each core writes only its own words, tagging values with core id
  and sequence number, so that:
  - a core's own words must read back exactly;
  - other cores' words must carry the right owner and never go backwards;
  - a final read-back checks every word.

  Every miss is checked against `WCL_arb + L_acc + 2` (or the PutM form),
  and every bus transaction against its length. At the end each core's
  total memory latency is printed, split into hits, misses and misses with
  a replacement. It is checked against the task bound
  `R_T · (2·WCL_perReq + 3)` for `R_T` requests. The bench also counts each
  mechanism and fails if one never happened in a configuration: hits,
  GetS, GetM, Upg, PutM, cache-to-cache transfer, overlapped write-back
  (MSI/MESI), memory supply, E install and silent E→M (MESI/MOESI), supply
  from O (MOESI), waiting for the bus, and several outstanding requests.
- **Full size** (`tb_pcc_top_full`): `pcc_top` with every parameter at its
  default (MSI, TDM, 16 KB L1s, 4 + 50 cycle access, 256 KB memory), the
  same checker, and addresses spread so that different lines fall in the
  same set. The worst observed miss on the bus was 265 cycles against the
  bound of 270.
- **All data shared** (`tb_pcc_top_same_trace`): four in-order cores run
  one identical request trace at the same time, so every line is
  contended by all cores. This is the worst case for coherence
  interference. The trace is a fixed hash of the request number. All 12
  configurations run at the default sizes.
- **Out-of-order cores** (`tb_pcc_top_ooo`): all four cores keep up to 8
  requests outstanding, under MOESI with each arbiter, at the default
  sizes.

Worst observed bus part of a miss (cycles) against the bound, in the
all-shared bench, per core 0..3:

| | observed | bound |
|---|---|---|
| TDM | 261 261 261 261 | 270 |
| RR | 211 216 211 216 | 216 |
| WRR | 211 216 211 216 | 270 378 432 432 |
| HRR | 107 211 427 432 | 108 216 432 432 |

The values are the same for all three protocols, within ±5 cycles. TDM, RR
and HRR reach or come within one access phase of the bound. WRR stays far
below it for in-order cores: a core with one request at a time cannot use
its weight, so the other cores rarely make it wait that long. With
out-of-order cores the bounds also hold, for example 430 of 432 for HRR
cores 2 and 3.

Protocol handshakes are also covered by assertions in the RTL. These
include: a grant only when the bus is free, a single owner, TDM transactions
fitting in their slot, no grant to a cache that is not waiting, and FIFO
overflow/underflow.

### Simulating with Verilator

The package must be compiled first. For the system bench:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/pcc_pkg.sv rtl/pcc_req_fifo.sv rtl/pcc_l1_cache.sv rtl/pcc_bus.sv \
  rtl/pcc_tdm_arbiter.sv rtl/pcc_rr_arbiter.sv rtl/pcc_wrr_arbiter.sv \
  rtl/pcc_hrr_arbiter.sv rtl/pcc_bus_arbiter.sv rtl/pcc_shared_mem.sv \
  rtl/pcc_top.sv tb/pcc_traffic_checker.sv tb/pcc_top_bench.sv \
  tb/tb_pcc_top.sv --top-module tb_pcc_top -o sim
./obj_dir/sim
```

For `tb_pcc_top_same_trace` and `tb_pcc_top_ooo`, replace the last file
and the top module. For `tb_pcc_top_full` the list is the same, without
`tb/pcc_top_bench.sv`. Unit benches need only the package, their module
and (for the L1) the FIFO and `tb/pcc_l1_scenario.sv`. Verilator is
two-state, so everything that is read is reset or initialised.

To try another configuration, set `PROTO` / `ARB` on `pcc_top`. In the
system bench, the traffic is set by the checker's parameters: `N_REQ`
requests per core, `N_OOO` out-of-order cores, `POOL_LINES` shared lines,
`LINE_STRIDE`, and `SAME_TRACE` (every core issues the same trace).

## Design choices beyond the behaviour described above

The coherence behaviour, the bus properties, the arbiters, their bounds and
the evaluated sizes are the scheme's own. The following are choices made for
this RTL:

- **Line size 64 bytes**, 32-bit byte addresses, 32-bit words; one word per
  core request.
- **Wired-OR snoop responses** sampled in the last request-phase cycle. The
  snoopers change state at that same point.
- **Upgrade (Upg)** is a separate data-less message, for stores to S, and to
  O under MOESI. It takes only the request phase.
- **Eviction** is a separate PutM transaction in the evicting core's own turn,
  before the miss. An E line is written back too, as the E-state protocols
  require a PutM for it. S lines are dropped without a message.
- **Message chosen in the grant cycle** (see above).
- **In-order buffer per core.** Requests are served one at a time from the
  head of an 8-deep buffer, and a later hit does not overtake an earlier
  miss. The bound is stated per request at the head of the buffer.
- **The shared memory is a single-port on-chip array** (256 KB by default)
  standing in for a perfect last-level cache. It is cleared after reset,
  taking one cycle per line; `SM_LINES` sets its size. Off-chip memory and a
  real LLC with misses are not modelled.
- **The TDM slot owner** may start only in the first cycle of its slot, so a
  transaction always fits in the slot. Idle slots are not given to others.
- **The HRR table construction** (first free entry, then every `HP/W`
  entries, by falling weight) is one standard way to spread the entries.
- **Latency at the core port** adds 2 cycles to `WCL_arb + L_acc` for the
  request and response registers (3 for the write-back case).

Not covered:

- The processor cores and their pipelines; the benches drive the core ports
  with random traffic.
- The benchmark traces used to evaluate the scheme: EEMBC (4 copies of one
  trace, all data shared) and SPLASH-3 (4 threads, in-order and with 8
  outstanding requests). The two workload benches above reproduce their
  sharing pattern and core types with synthetic traffic. The SPLASH-3 data
  sets are also far larger than the default 256 KB memory.
- The baseline and comparison systems (split-bus FCFS, PMSI/PMESI variants,
  and others).
