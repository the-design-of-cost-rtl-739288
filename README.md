# LAP: a stride prefetcher that needs only a few PC bits

A stride prefetcher usually identifies each load stream by the full program
counter of the load instruction. In a deep pipeline the load-store unit sits
far from the fetch stage, and carrying a 44- or 64-bit PC all the way back to
it costs latches, wiring and timing. Load Attribute Prefetching (LAP) avoids
most of that cost. It tags a stream with a short **Stream_ID**: 4 bits of the
PC plus the low 4 bits of the load's base-register number `rA`. Those register
bits already travel down the pipeline. In the PowerPC form `ld rD, d(rA)`, the
base register of a hot strided load is usually not shared with other loads.
The few PC bits and the register number together keep unrelated loads apart
well enough.

Each stream is followed by a **prefetch engine (PE)**. A PE learns the stream's
stride from its cache misses and builds confidence through a small ordered
state machine. Once confident, it runs ahead of the program by 1 to 6
prefetches. Prefetches go straight into the L1 data cache, not into a separate
buffer. To tell whether the program is using those prefetched lines, with no
"prefetched" bit in the cache, each PE keeps a **prefetched moving window**: a
hit between the program's last access and the PE's latest prefetch counts as
a useful prefetch.

This repository holds synthesizable SystemVerilog for the prefetcher (8 PEs by
default) and self-checking testbenches for every block. It follows the
published description of LAP (*The Design of Cost-Effective Stride-Prefetching
for Modern Processors*). That description leaves several details open, and
the choices made here are marked as such below.

## Structure

```
 ld_valid, ld_pc, ld_ra,            +-------------------+
 ld_addr, ld_miss  ---------------> | lap_stream_lookup |  Stream_ID = {rA[3:0], PC[5:2]},
                                    +-------------------+  compared with all 8 PE tags
                                        | match_vec   | PE miss (a missing load, no match)
                                        v             v
                    +----------+    +-------------------+
                    | lap_pe x8| <- | lap_alloc_filter  |  allocate / mark NQD
                    | (lap_pmw |    +-------------------+
                    |  inside) |
                    +----------+
                      pf_req, pf_addr, state
                        v
                    +----------------+
                    | lap_pf_arbiter | --> pf_valid, pf_addr  (valid/ready, 1 per cycle)
                    +----------------+ <-- pf_ready
```

| File | Contents |
|---|---|
| `rtl/lap_pkg.sv` | state enum (ordered by confidence), event struct, run-ahead limits, promote/demote |
| `rtl/lap_stream_lookup.sv` | Stream_ID formation and associative match against the PE tags |
| `rtl/lap_alloc_filter.sv` | choice of the PE to allocate or to mark for replacement |
| `rtl/lap_pe.sv` | one prefetch engine: stride stores, state machine, run-ahead |
| `rtl/lap_pmw.sv` | prefetched-moving-window compare (used inside each PE) |
| `rtl/lap_pf_arbiter.sv` | confidence-priority arbiter onto the prefetch port |
| `rtl/lap_prefetcher.sv` | top level |

## Stream identification

For the default configuration, `stream_id = {ld_ra[3:0], ld_pc[5:2]}`. The
instructions are 4 bytes long, so PC[1:0] are always zero and are skipped.
The next four PC bits are the ones that vary most between neighbouring loads.
In the MSB-first numbering of a 44-bit PC, these are bits 38 to 41.
`PC_BITS` and `RA_BITS` set the number of bits; both must be at least 1. All
upper PC bits and `rA[4]` are ignored on purpose, so two loads that differ
only there share a PE.

The lookup is combinational: all PE tags are compared with the Stream_ID in
the cycle the load is reported. At most one PE holds a given Stream_ID, and
the top level asserts this.

## The prefetch engine state machine

This is the core of the design. A PE keeps:

| Store | Meaning |
|---|---|
| program address | last known access of the stream |
| program stride | distance between the last two misses (one cache line after allocation) |
| prefetch stride | the confirmed stride used for prefetching |
| prefetch address | next address to prefetch |
| last prefetch | most recent prefetched address (far end of the window) |
| ahead | prefetches issued ahead of the program |

The states are ordered by confidence. The number in an active state's name is
how far the PE may run ahead:

| State | Kind | Run-ahead | Meaning |
|---|---|---|---|
| OFF | free | 0 | not allocated |
| NQD | inactive | 0 | allocated, marked for replacement |
| SP  | inactive | 0 | learning the stride |
| SPD | inactive | 0 | stride seen twice, waiting for confirmation |
| LC1 | active | 1 | low confidence |
| HC1 | active | 1 | high confidence |
| HC2 | active | 2 | |
| HC4 | active | 4 | |
| HC6 | active | 6 | |

Transitions, all taking effect at the next clock edge:

* **Allocation** (from the allocation filter): go to SP with the Stream_ID as
  tag. The missing address becomes the program address, and the program
  stride is set to one cache line.
* **Miss in NQD, SP or SPD.** The *current stride* is the miss address minus
  the program address.
  * *Stride hit* (current stride = program stride): the stride is copied to
    the prefetch stride, and the prefetch address becomes miss + stride.
    SP or NQD goes to SPD; SPD goes to LC1.
  * *Stride miss*: the program stride takes the current stride, and the PE
    goes to SP.
  * In both cases the program address takes the miss address.
* **Hit in an active state**: the program address moves to the hit, which
  slides the window. If the hit was inside the moving window, one run-ahead
  credit is also returned, and confidence rises one step
  (LC1 → HC1 → HC2 → HC4 → HC6).
* **Miss in an active state, on the stride.** The prefetch was late or was
  lost (evicted, dropped for lack of bandwidth). The PE drops one step
  (HC6 → HC4 → HC2 → HC1 → LC1) but stays active. It restarts its run-ahead
  from the missing address.
* **Miss in an active state, off the stride**: the stream changed. The PE
  returns to SP with the new stride.
* **Prefetch granted**: the prefetch address advances by the stride, and
  *ahead* counts up. An active PE requests whenever *ahead* is below its
  state's limit.
* Hits in inactive states are ignored, so stride detection sees only the
  distances between misses.

The source describes the stores, the stride hit/miss rule, the initial
one-line stride, the state order, the run-ahead counts, the window feedback,
and the principle that a miss must not kill an active stream. The exact
transitions are this design's own reading of that description. These choices
are:

* the SP → SPD → LC1 confirmation;
* one step per event;
* NQD as the replacement mark;
* counting "outstanding" prefetches as prefetches not yet met by the program.

Completion of a prefetch by the memory system is not tracked. A prefetch
stops counting when the program hits inside the window, or when a miss
restarts the run-ahead.

## Prefetched moving window

`lap_pmw` compares cache-line numbers. For a positive stride, a hit is in
the window when the last-access line is below the hit line and the hit line
is at or below the last-prefetch line. A negative stride uses the mirror
image of this test. The window is empty while nothing is ahead. Because the
test works on line numbers, repeated hits within one line count once. The
window tracks lines wherever they are in the memory hierarchy, and needs no
tag bit in the L1.

## Allocation and replacement

A missing load whose Stream_ID no PE holds is a *PE miss*. The allocation
filter (`lap_alloc_filter`), lowest index first:

1. allocates a free (OFF) PE if there is one;
2. otherwise re-allocates a PE marked NQD;
3. otherwise marks the least confident inactive PE (SP before SPD) NQD, and
   allocates nothing this time;
4. if all PEs are active, drops the request.

A stray miss therefore cannot evict a stream that is still learning. It only
marks that stream's PE. If the owning stream misses again first, its PE goes
back to SP or SPD. The source names allocation filtering as a component;
the policy above is this design's own. One consequence is
that an active PE is never reclaimed by other streams. It leaves the active
states only through an off-stride miss of its own stream.

## Prefetch issue

`lap_pf_arbiter` grants one request per cycle. The PE in the highest
confidence state wins, and ties go to the lowest index. The winning address
is offered on `pf_valid`/`pf_addr`. It is taken when `pf_ready` is high in
the same cycle, and only then is the PE's run-ahead advanced. While the port
is stalled the offered address does not change, unless a load changes that
PE. The top level asserts this for cycles with no load.

## Interface and timing (`lap_prefetcher`)

| Port | Dir | Width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all PEs to OFF) |
| `ld_valid` | in | 1 | a load is reported this cycle (at most one per cycle) |
| `ld_pc` | in | `PC_W` | its PC |
| `ld_ra` | in | 5 | its base register field |
| `ld_addr` | in | `ADDR_W` | its effective address |
| `ld_miss` | in | 1 | it missed in the L1 data cache |
| `pf_valid`, `pf_addr` | out | 1, `ADDR_W` | prefetch offered |
| `pf_ready` | in | 1 | prefetch accepted |
| `pe_state` | out | `NUM_PE` x `pe_state_e` | state of every PE (monitoring) |
| `ev` | out | `lap_events_t` | one-cycle event flags (monitoring) |

A load changes the PEs at the next rising edge. The first prefetch of a PE
is offered in the cycle after the load that made it active. Everything
before the arbiter's multiplexer is registered.

Parameters, with their defaults:

| Parameter | Default | Source |
|---|---|---|
| `NUM_PE` | 8 | published design |
| `PC_W` | 44 | published design |
| `PC_BITS` | 4 | published design |
| `RA_BITS` | 4 | published design |
| `ADDR_W` | 44 | assumed, equal to the PC width |
| `LINE_BYTES` | 64 | assumed; the source does not give the L1 line size |

With the defaults, synthesis gives about 1,170 word-level cells and 1,880
flip-flops. Almost all of these are the eight PEs' 44-bit address and stride
registers.

## What is not here

The prefetcher is a component of a processor. The L1 data cache, the L2,
the memory controllers and the pipeline that delivers `ld_pc` and `ld_ra`
belong to the host, and are not part of this RTL. The full-PC prefetcher and
the prefetch-buffer variant that LAP is compared with are not built either.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_lap_pmw`: directed edge cases for both stride signs, plus random cases
  against a line-number reference.
* `tb_lap_stream_lookup`: Stream_ID bit selection, computed independently
  from MSB-first PC bit numbers, and random tag matching.
* `tb_lap_alloc_filter`, `tb_lap_pf_arbiter`: random states and requests
  against a priority search.
* `tb_lap_pe`: a directed walk through every state and limit. It checks the
  cycle of the first prefetch, the run-ahead of 1/2/4/6 and both kinds of
  active miss. Then 20,000 random cycles are compared against a behavioural
  model.
* `tb_lap_prefetcher`: end to end at the default parameters. It models the L1
  as a set of lines, with random prefetch-port back-pressure and random loss
  of prefetched lines. It checks:
  * that a hit allocates nothing, and that loads share a PE exactly when
    their `rA[3:0]` and `PC[5:2]` agree;
  * that every prefetch lies on a stream's stride lattice, at most 7 strides
    ahead;
  * that more than 80% of the loads of eight interleaved strided streams hit
    once the strides are learned (over 99% in practice);
  * that each of these mechanisms occurs at least once: allocation,
    re-allocation, NQD marking, drop, stride hit/miss, activation, window
    hit, demotion, stream break, issue, stall, arbitration conflict and HC6.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/lap_pkg.sv \
    tb/tb_lap_prefetcher.sv --top-module tb_lap_prefetcher -Mdir obj
./obj/Vtb_lap_prefetcher
```

Replace the testbench name to run another one. Each finishes in well under a
second.

The testbenches check the design against the behaviour described above. They
do not reproduce the performance, accuracy or timeliness figures published
for LAP, which came from a cycle-accurate processor model running SPEC2000
traces.
