# Shared instruction cache with low-cost prefetching for a low-power core cluster

A cluster of small single-issue cores that share one tiny instruction cache
(1 KB) saves area and power. The cost is misses: loops bigger than the cache,
and code that runs only once, miss on every line and wait about 20 cycles for
the off-cluster L2 memory. This design adds a prefetcher that costs almost
nothing in hardware. It has three sources:

- **Software.** The program writes an address and a byte count to two
  registers before it calls a function.
- **Next-line.** Every demand miss starts a burst at the next line.
- **Stream.** Bursts keep running on their own, spaced by a programmable pause.

All three share one small state machine. Its requests enter the cache through
one extra controller that has the lowest priority. A prefetch therefore never
delays a core's own miss.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, apart from the
testbench models. It has been simulated with Verilator (two-state, `--timing`).

## Organisation

```
 core0..3 fetch ──► private controller ×4 ──┐  (tag + data read, hit in 1 cycle)
                         │ read               │ miss requests
              multi-port tag / data arrays    ▼
                         ▲ write         miss interconnect (round-robin, cores first)
 control regs ─► prefetch FSM ─► prefetch    │         ▲ lowest priority
                     ▲          private ctrl ─┘─────────┘ (tag read only)
                     │ demand miss                  │
                     └───────────── master controller (merge table) ◄──► L2 (8-byte bus)
```

| File | Part |
|---|---|
| `rtl/icache_pkg.sv` | constants, enums, miss-request and event structs, register offsets |
| `rtl/pulp_icache_pf.sv` | top: wires everything below |
| `rtl/icache_tag_array.sv` | tag + valid per way and set: 5 read ports (4 cores + prefetcher), 1 write port |
| `rtl/icache_data_array.sv` | 16-byte lines: 4 read ports, 1 write port |
| `rtl/icache_pri_ctrl.sv` | per-core private controller |
| `rtl/icache_pf_pri_ctrl.sv` | prefetch private controller (tag only) |
| `rtl/icache_miss_arb.sv` | miss interconnect |
| `rtl/icache_master_ctrl.sv` | master controller with merge-refill table |
| `rtl/icache_plru.sv` | pseudo-LRU bits |
| `rtl/icache_lfsr.sv` | random source for pseudo-random replacement |
| `rtl/icache_victim_sel.sv` | victim way choice |
| `rtl/icache_ctrl_regs.sv` | control registers |
| `rtl/icache_pf_fsm.sv` | prefetch state machine |
| `rtl/icache_stats.sv` | statistics counters (hit rate, access time, L2 traffic, cycles, usage) |

Default parameters of the top (`pulp_icache_pf`):

| Parameter | Default | Meaning |
|---|---|---|
| `NB_CORES` | 4 | number of cores, one fetch port each |
| `CACHE_BYTES` | 1024 | cache size in bytes |
| `ASSOC` | 2 | number of ways |
| `REPL` | `REPL_PLRU` | replacement policy: `REPL_PLRU` or `REPL_PRAND` |
| `NB_MSHR` | 8 | number of refills that can be outstanding |

Sets = `CACHE_BYTES / (16 * ASSOC)`, so the default has 32 sets. A 32-bit
address splits into a 4-bit line offset, `log2(sets)` index bits and the rest
as tag (23 bits at the default). The arrays are flip-flops with combinational
read, like the standard-cell memories this kind of cluster uses. Sizes from
512 B to 16 KB and 1 to 8 ways elaborate. The pseudo-LRU policy is built for
two ways only; pseudo-random works for any way count.

## Fetch path: hits and misses

Each core has a request/grant port. The address is any byte address; the
answer is the whole 16-byte line that holds it. Timing of one fetch:

- **Hit.** The controller grants in the request cycle. Tag check and data read
  are combinational. `fetch_rvalid_o` and `fetch_rdata_o` come one cycle later.
- **Miss.** The controller picks a victim way at once, then sends a miss
  request `{line, way, pf=0}` to the interconnect. It grants no new request
  until the line arrives.
- **Completion.** The master controller broadcasts every refill: the line
  number and its 128 bits of data. A waiting controller whose line matches
  finishes from that broadcast. It completes the same way if the refill lands
  while its own request still waits for the interconnect, or in the very cycle
  of its lookup.

With an L2 latency of L cycles, a lone demand miss returns its data L + 6
cycles after the request. That is 20 cycles for L = 14.

Because cores are single-issue and fetch one line at a time, each private
controller has at most one fetch in flight.

## Merging refills: the master controller

Four cores running the same code often miss on the same line in the same few
cycles. The master controller keeps a table of outstanding refills
(`NB_MSHR` entries, FIFO order). Each entry holds the line, the victim way and
a prefetch flag.

- A miss request for a line already in the table is absorbed, so there is no
  duplicate L2 read. If the entry was a prefetch and a core now wants the line,
  the entry becomes a demand refill.
- Any other request takes a new entry. The request is refused only when the
  table is full.
- Entries go to L2 in order, as single-line reads. L2 answers in order with
  two 64-bit beats, lower address first.
- One cycle after the last beat, the controller does four things: it writes
  data and tag, sets the valid bit, broadcasts the refill to the private
  controllers, and frees the entry.

The way is fixed by whoever asked first. A core that merges into an entry gets
that way.

## Replacement

A refill uses the lowest-numbered free (invalid) way of its set. When the set
is full, the policy chooses:

- **Pseudo-LRU (default).** One bit per set, 32 bits in all. All four cores can
  hit in the same cycle, so the bit is updated by a cheap rule:
  - if any access that cycle used way 0, way 1 becomes LRU;
  - otherwise, if any access used way 1, way 0 becomes LRU.

  The inputs are the four cores' hits plus a fifth: the write of a demand
  refill. Prefetch lookups and prefetch refills never touch the bit. A line
  that was prefetched but not yet used therefore does not push out code a core
  is running.
- **Pseudo-random.** A free-running 16-bit LFSR
  (x^16 + x^14 + x^13 + x^11 + 1), taken modulo the number of ways.

## The prefetch state machine

This is the part that needs the most care. `icache_pf_fsm` holds the current
address, the remaining byte count, a wait counter and one pending event. It
has four states:

| State | What happens |
|---|---|
| IDLE | Waits for an event. |
| REQ | Holds a 16-byte sub-request to the prefetch private controller until it is granted. |
| CHECK | Takes a pending or new event first (this is a preemption). Else, if more than 16 bytes remain: size −= 16, address += 16, back to REQ. Else: to WAIT in stream mode, to IDLE otherwise. |
| WAIT | Stream mode only. Counts down the programmed pause, then starts a new burst of the hardware size at the last prefetched line + 16. |

Events:

- **Software request.** A write to register 0x08 with a non-zero software
  size. The burst starts at the written address.
- **Demand miss.** A demand refill accepted on the L2 request channel, with
  the hardware mode not OFF and a non-zero hardware size. The burst starts at
  the missing line + 16. Refills made by the prefetcher itself do not count,
  so bursts do not trigger themselves.

If both events come in the same cycle, the software request wins.

Preemption: a new event ends the running burst, or the stream pause, and
starts the new one. The sub-request already held in REQ is never abandoned,
because the controller may already be acting on it. An event that arrives
during REQ is kept and taken at the next CHECK. Its start counts as a
preemption.

Throughput is one sub-request every two cycles when the controller grants at
once. In stream mode with pause W, successive bursts are W + 2 cycles apart at
the seam between them.

The prefetch private controller checks each sub-request against the tags:

- If the line is present, or is being written this very cycle, it drops the
  sub-request and grants at once.
- Otherwise it sends a refill request `{line, victim way, pf=1}`. That request
  is granted only when no core has a miss request in the same cycle.

A line already on its way from L2 is caught by the merge table.

## Control registers

The register port uses request/grant with a write enable. Grant is immediate;
`reg_rvalid_o` and the read data come one cycle after every request. Unknown
offsets read 0.

| Offset | Name | Reset | Meaning |
|---|---|---|---|
| 0x08 | PF_ADDR | 0 | software prefetch address; **writing it starts the burst** |
| 0x18 | PF_SIZE | 16 | software burst size in bytes (0 disables) |
| 0x20 | HWPF_MODE | 2 | 0 off, 1 next-line, 2 stream (next-line bursts plus stream continuation) |
| 0x28 | HWPF_SIZE | 256 | hardware burst size in bytes (0 disables) |
| 0x30 | HWPF_WAIT | 60 | stream pause in cycles (16 bits) |
| 0x38 | STATS_START | – | write: clear all statistics and start counting |
| 0x40 | STATS_STOP | – | write: stop counting (values freeze) and sample cache usage |
| 0x80 + 4·i | statistic i | 0 | read only, see below |

A program prefetches a function by writing its size to 0x18 and then its
start address to 0x08.

## Statistics

To judge a program's use of the cache, software brackets the part of interest
with a write to 0x38 before it and a write to 0x40 after it. In between,
`icache_stats` counts the following (32-bit counters that wrap):

| i | Statistic |
|---|---|
| 0 | cycles gathered (execution time) |
| 1 | lines requested from L2 (miss traffic, 16 bytes each) |
| 2 | of those, lines requested by the prefetcher |
| 3 | bytes of valid lines when gathering stopped (cache usage) |
| 4 | 1 while gathering |
| 8 + 3c | fetch accesses of core c |
| 9 + 3c | hits of core c |
| 10 + 3c | summed memory access time of core c, in cycles |

The access time of one fetch runs from the cycle the core requests it to the
cycle before its response: 1 for a hit, about 20 for a miss. The per-core
counter adds one for every cycle in which the core requests a fetch, or has an
accepted fetch that has not been answered yet. The counter divided by the
accesses is the core's average access time. Hit rate is hits over accesses.
L2 bandwidth is lines × 16 bytes over the gathered time. The bandwidth figures
in this README count one cycle as 20 ns, the period of the 8-byte L2 bus,
which therefore peaks at 400 MB/s. With a faster cluster clock, scale the
cycle time accordingly.

## Other ports

- **L2 port.**
  - Request side: `l2_req_valid_o`, `l2_req_addr_o` (line-aligned) and
    `l2_req_ready_i`.
  - Response side: `l2_rsp_valid_i` and `l2_rsp_data_i` (64 bits). The memory
    must answer in request order, two beats per line.
- **Event outputs.** Per-cycle flags for performance counters:
  - `hit_o[c]` and `miss_o[c]` for each core;
  - `evt_o` (`cache_evt_t`): the prefetch state, burst starts by source,
    preemptions, dropped and issued prefetches, merged and new refills, and
    demand refills sent to L2.

## Where this follows the source design and where it does not

These points follow the source design:

- the organisation: per-core private controllers on shared multi-port arrays,
  a miss interconnect, and a master controller that merges refills;
- the 1 KB, 2-way, 16-byte-line baseline and the 8-byte L2 bus;
- the one-cycle hit;
- the pseudo-LRU rule, its fifth input, and its blindness to prefetches;
- the tag-only prefetch controller at lowest priority;
- registers 0x08 and 0x18;
- the IDLE/REQ/CHECK/WAIT machine, next-line from the missing line + 16,
  stream restart from the last line + 16, and preemption in every state.

These are choices made here:

- **Arbitration.** The interconnect is a flat round-robin arbiter with the
  same effect as a tree.
- **Merge table.** It has 8 entries and sends to L2 in order.
- **L2 protocol.** The L2 port is a simple in-order read channel, not a full
  AXI port.
- **Hardware-prefetch and statistics registers.** The offsets and reset
  values of the hardware-prefetch registers are this design's own. So is the
  form of the start and stop commands and of the statistics window. The source
  only names the start and stop commands and the figures it gathers.
- **Refill events.** An event during REQ is latched. A refill broadcast
  completes a waiting fetch directly.
- **Banks.** The data array is not split into banks. Banking only changes the
  physical layout.
- **Prefetch rate.** The source describes a rate of 16 bytes per cycle. This
  machine issues 16 bytes every two cycles, and the 8-byte L2 bus could not
  refill faster than one line every two cycles either.
- **Replacement default.** The source names pseudo-random as its default in
  one place but runs its experiments with pseudo-LRU. `REPL` selects either;
  pseudo-LRU is the default here.

Not part of this RTL:

- the cores, with their own small fetch buffers;
- the L2 memory, modelled behaviourally in `tb/l2_mem_model.sv`;
- the data memory, DMA and the rest of the cluster.

## Verification

Each module has a self-checking testbench in `tb/` that compares against an
independent reference model. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_icache_tag_array`, `tb_icache_data_array` | random reads and writes against a shadow array |
| `tb_icache_plru` | every access combination against the update rule |
| `tb_icache_lfsr` | sequence against a software LFSR and its period |
| `tb_icache_victim_sel` | free-way and policy choice |
| `tb_icache_pri_ctrl`, `tb_icache_pf_pri_ctrl` | hit, miss, drop and bypass cases, with cycle counts; then random fetches with early and late refills checked against a model |
| `tb_icache_miss_arb` | round-robin fairness and priority under random traffic |
| `tb_icache_master_ctrl` | merging, ordering and write-back under random traffic with a stalling L2 |
| `tb_icache_ctrl_regs` | register map, command pulses, statistics window; then random back-to-back accesses checked every cycle against a model |
| `tb_icache_stats` | every counter against a reference under random activity and random start/stop |
| `tb_icache_pf_fsm` | every transition, addresses, sizes, pause length and preemption; then random events, modes and grant stalls checked cycle by cycle against a model |
| `tb_pulp_icache_pf` | end to end at the default parameters (see below) |
| `tb_icache_workloads` | the synthetic programs on 16 cache configurations (see below) |

`tb_pulp_icache_pf` runs the top with the default parameters against the L2
model (latency 14). It steps through directed phases:

- a timed miss (20 cycles) and a timed hit (1 cycle);
- merged misses and a pseudo-LRU eviction;
- software bursts, dropped prefetches and preemption;
- next-line bursts and stream bursts after the pause;
- all four cores looping concurrently;
- all four cores fetching random lines of a 2 KB region, while the
  prefetcher settings change at random and software prefetches are issued.

Every returned line is compared with the memory contents. At the end, every
statistics counter read over the register port must equal the testbench's own
count. The testbench counts each mechanism and fails if any never happened.

### Workloads

`tb_icache_workloads` runs two synthetic programs. In both, four cores run the
same code, started 3 cycles apart. A core takes 4 cycles per 16-byte line on
a hit, i.e. one instruction per cycle.

- **singleloop:** a 3200-byte loop (800 instructions), run 3 times.
- **multifunc:** a 4-line main loop that calls four functions. Each function is
  a 2400-byte loop (600 instructions) run twice. The main loop runs 3 times.

Each program runs on 16 copies of the cache side by side, each against its own
L2 model. The run takes a few seconds. Hit rates measured on the 1 KB, 2-way,
pseudo-LRU cache:

| Configuration | singleloop hit % / cycles | multifunc hit % / cycles |
|---|---|---|
| no prefetch | 0 / 13816 | 0 / 83102 |
| next-line 32 B | 33 / 6235 | 33 / 37502 |
| next-line 128 B | 77 / 3727 | 77 / 22454 |
| next-line 288 B | 89 / 3043 | 89 / 18387 |
| stream 256 B, pause 60 | 88 / 3100 | 87 / 18852 |
| stream 256 B, pause 0 | 95 / 2735 (906 L2 lines) | 94 / 16677 |
| software 512 B per call | 10 / 12642 | 9 / 76058 |
| software + next-line 128 B | 77 / 3731 | 78 / 22064 |
| 16 KB cache, no prefetch | 66 / 6216 | 83 / 25950 |

Without prefetching, both programs thrash the 1 KB cache. The four cores
almost always miss together, and the refills merge. Next-line and stream
prefetching recover most of the hit rate. A 512-byte software prefetch at each
call covers only the first 32 lines of a 150- or 200-line body, so on its own
it helps little here. It suits short functions and code that runs once. The testbench checks these effects,
not the exact numbers:

- prefetching raises the hit rate and shortens the run;
- longer next-line bursts hit more;
- a shorter stream pause moves more lines over L2;
- a large cache beats a small one.

The cores here consume a line every 4 cycles, faster than real code. With this
fast a consumer, a pause of 0 cycles still pays off, at the cost of about 50%
more L2 traffic. With slower code, the stream runs far ahead of use and evicts
lines still needed. That is why the default pause is 60 cycles.

To simulate with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal --top-module tb_pulp_icache_pf \
  rtl/icache_pkg.sv rtl/icache_tag_array.sv rtl/icache_data_array.sv \
  rtl/icache_plru.sv rtl/icache_lfsr.sv rtl/icache_victim_sel.sv \
  rtl/icache_pri_ctrl.sv rtl/icache_pf_pri_ctrl.sv rtl/icache_miss_arb.sv \
  rtl/icache_master_ctrl.sv rtl/icache_ctrl_regs.sv rtl/icache_pf_fsm.sv \
  rtl/icache_stats.sv rtl/pulp_icache_pf.sv tb/l2_mem_model.sv tb/tb_pulp_icache_pf.sv
./obj_dir/Vtb_pulp_icache_pf
```

List `rtl/icache_pkg.sv` first. For a unit test, use that module's RTL file(s)
and its testbench. For the workload test, add `tb/core_fetch_model.sv` and
use `tb/tb_icache_workloads.sv` as the top.

The random tests draw from `$urandom`, so `+verilator+seed+N` on the
simulator's command line gives a different run. All of them pass for every
seed tried (40 for the end-to-end test, 15 for each unit test).
