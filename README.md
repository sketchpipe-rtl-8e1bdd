# SketchPipe switch model: splitless sketches on a multi-pipeline switch

A switch with several compound pipelines (each an ingress and an egress,
joined by a traffic manager) only sees a packet in two of them: the ingress
it arrives at and the egress it leaves from. The usual way to run a sketch
such as count-min on such a switch is to copy every counter array into
every pipeline and add the slices up afterwards. That wastes counters and
leaves some slices much busier than others. This design places each
sketch array in exactly one pipeline instead. That is *splitless* placement,
as described in "SketchPipe: Toward Accurate Sketch-based Network
Measurement on Multi-Pipeline Switches with Splitless Sketch Placement".

A packet updates only the arrays on its own path. For the arrays it missed,
its flow key is aggregated in a small cache at the end of the arrival
ingress. *State packets* carry the aggregated count to the missing arrays.
They are synthetic packets that the switch makes once, one per cache entry,
and they move only on the internal recirculation port. Normal traffic is
never rerouted and never slowed down. Every array still ends up seeing
every key, with the right count.

This repository holds synthesizable SystemVerilog for that data plane:
- the compound pipelines, each with its arrays, cache, state packet router,
  generator and recirculation loop;
- the traffic manager with its separate state packet buffer;
- the count-min query that the control plane uses to read estimates and
  heavy keys.

## Block map

| File | Block |
|---|---|
| `rtl/sp_pkg.sv` | Types: the packet word `pkt_t`, the placement vectors, the statistics struct, the hash seeds. |
| `rtl/sp_hash.sv` | Seeded 32-bit mixing hash that gives cache and counter indices. |
| `rtl/sp_sketch_array.sv` | One count-min array as one pipeline stage. |
| `rtl/sp_cache.sv` | The flow-key cache at the end of ingress. |
| `rtl/sp_state_router.sv` | Chooses the next pipeline for a state packet. |
| `rtl/sp_pktgen.sv` | State packet generator: one packet per cache entry. |
| `rtl/sp_fifo.sv` | Multi-push FIFO used for the traffic manager queues and the recirculation queue. |
| `rtl/sp_traffic_manager.sv` | Crossbar from every ingress to every egress. Each egress has a normal queue and a dedicated state queue. |
| `rtl/sp_compound_pipe.sv` | One compound pipeline: the ingress and egress datapaths, recirculation, the generator and statistics. |
| `rtl/sp_cm_query.sv` | Count-min estimate (the minimum over arrays) and heavy-key compare. |
| `rtl/sketchpipe_switch.sv` | Top: `N_PIPES` compound pipelines plus the traffic manager plus the query. |

The defaults describe a four-pipeline switch in the style of a Tofino2:
- eight normal ports and one internal port per pipeline;
- 2^16 cache entries per pipeline;
- a four-array count-min sketch with 2^16 counters per array.

The arrays are placed as follows:
- array 0 in the ingress of pipeline 0;
- array 1 in the egress of pipeline 0;
- array 2 in the ingress of pipeline 1;
- array 3 in the egress of pipeline 1.

Pipelines 2 and 3 carry traffic but host no array.

## Placement as parameters

Where each array goes is fixed at compile time by two packed parameters:
- `ARRAY_PIPE[j]` is the pipeline that hosts array `j`;
- `ARRAY_EG[j]` is 1 when array `j` is in that pipeline's egress and 0 when it is in the ingress.

`N_ARRAYS` gives the number of arrays, up to 64 (the width of the bitmap).

Each `sp_compound_pipe` instantiates only the arrays whose entry names it.
Inside an ingress or egress they run in index order, one register stage
each. No array exists twice.

Choosing the placement is an optimisation problem solved offline. That
solver is not hardware and is not included. Supply its answer through these
parameters.

`PRED[j][k] = 1` means that array `k` must be measured before array `j`.
This is the visiting order that sketches with dependent arrays need. For
count-min it is all zero.

## The cache and the bitmap

The cache sits at the end of every ingress (`sp_cache`). A normal packet
with key `f`, going to egress pipeline `d`, is handled like this:

1. M, the set of arrays the packet visits, is the arrays in this ingress
   plus the arrays in the egress of `d`. This is a constant lookup on the
   placement.
2. The cache hashes `f` to entry `i`.
3. If entry `i` is empty or already holds `f`, the count goes up by one and
   the entry's bitmap becomes `~M`, the arrays still owed this key.
4. Otherwise the old key is **evicted**: the entry is overwritten with
   `{f, 1, ~M}`. Evict-on-collision is a cheap approximation of LRU that a
   switch stage can do in one access. The old key, its count and its bitmap
   are not lost. They leave the cache one cycle later as a *one-shot* state
   packet (`evo_valid`/`evo_pkt`, see below).
5. A packet whose path already covers every array is not cached.

Each entry is a 64-bit key+count word and a 64-bit bitmap word, with a
valid flag beside it.

The bitmap is overwritten on every hit, not OR-ed. The count is therefore
delivered exactly only when all packets of a flow take the same path.
Flow-consistent (ECMP-like) routing ensures this, and the tests assume it.
With per-packet spraying, a flow's cached count goes to the arrays missed by
its most recent packet.

## State packets

Each pipeline's generator (`sp_pktgen`) starts on `gen_start`. It then
creates `CACHE_DEPTH` state packets, with indices `0..k-1`, an empty bitmap
and `home` set to its own pipeline. It feeds them into the recirculation
slot of its ingress. `gen_gap` sets how many cycles the generator waits
after each packet. 0 means as fast as the slot takes them; a larger value
keeps the generator's share of the internal port small.

The packets are never destroyed; they loop forever:

1. **Poll.** A state packet that is home with an empty bitmap reaches the
   cache and reads entry `idx`.
   - If the entry is empty, the packet goes on unchanged, recirculates and
     tries again.
   - Otherwise it copies the key, count and bitmap and empties the entry.
2. **Route.** `sp_state_router` chooses the next array. It takes the
   lowest-numbered set bit whose predecessors (`PRED`) are all clear. It
   sends the packet through the traffic manager to the pipeline that hosts
   that array.
   - An egress array is updated on the way through.
   - An ingress array is reached when the packet recirculates there.
3. **Update.** At array `j` the counter for the key grows by the carried
   count, and bit `j` is cleared.
4. **Return.** With an empty bitmap the router sends the packet back to
   `home`, where it polls its entry again.

One-shot packets carry evicted keys. They take the same route, but they
never poll the cache, and they are discarded as soon as their bitmap is
empty, either at the egress or at the router. They wait in a per-pipeline
eviction queue (`EQ_DEPTH`, 16) for the recirculation slot. An evicted key
that finds the queue full is lost and counted (`evict_lost`).

State packets enter an ingress and leave an egress only in that pipeline's
recirculation slot. Each pipeline offers one packet slot per clock, in a
repeating frame of nine slots:
- eight slots for normal ports (`rx_ready` high);
- one slot for the internal port.

The recirculation slot alternates between two sides:
- the eviction queue;
- everything else, where the generator goes before the recirculation queue.

A side with nothing to send gives its turn away. If the generator waited
for looping packets, it would never finish when the loop is short. If
evicted keys waited for the generator, they would overflow their queue
during the first `9 * CACHE_DEPTH` cycles. On the egress side,
the state queue is popped only when the small recirculation queue
(`RQ_DEPTH`) behind the egress has room. No state packet is lost inside a
pipeline.

## Buffers

The traffic manager (`sp_traffic_manager`) keeps two queues per egress:
- a normal queue of `NQ_DEPTH` packets;
- a state queue of `SQ_DEPTH` packets.

State packets therefore never take space from normal traffic. The published
design sizes the state buffer as k state packets. In this closed-loop model,
however, every pipeline's k packets can pile up at one egress: pipelines
that host arrays receive more state traffic than their single recirculation
slot drains.

The default is therefore `SQ_DEPTH = N_PIPES * CACHE_DEPTH`, which makes
state packet loss impossible. A smaller value models a tighter buffer.
Packets that do not fit are dropped and counted in `state_drops`. A new
`gen_start` replaces lost packets. Normal drops are counted in
`normal_drops`.

## Reading the sketch

`q_key` is looked up combinationally in every array. The read port is a
second port on each array's memory.
- `q_counts[j]` returns array `j`'s counter.
- `q_estimate` returns the count-min estimate, the minimum over the existing arrays.
- `q_heavy` is set when the estimate is at least `q_threshold`.

`epoch_clear` empties every array and every cache in one cycle. It does so
through per-entry valid flags.

`stats[p]` (`pipe_stats_t`) counts each pipeline's events:
- cache hits, inserts, evictions and skips;
- state loads and empty polls;
- array updates made by state packets;
- state packets sent to another pipeline or home;
- recirculations;
- keys reported during a flush;
- evicted keys forwarded and lost.

`cache_occupancy[p]` gives the number of valid cache entries.

## End of an epoch

When the control software closes a measurement epoch, some keys are still
travelling in state packets. There are two ways to handle them.

- **Next epoch (default).** `epoch_clear` empties the arrays and the caches.
  Packets in flight carry on and update the arrays of the new epoch. Large
  flows barely notice.
- **Report.** While `flush` is high, every state packet that reaches the
  state router still holding a key is copied to `rep_valid`/`rep_pkt`. The
  report carries the key, the count and the bitmap of arrays that have not
  seen it. The packet then returns home with an empty bitmap. Entries polled
  during a flush are reported at once. The software then adds the reported
  counts to the arrays named in the bitmap. Nothing is lost, and the current
  epoch stays exact, at the cost of report bandwidth.

Hold `flush` until the caches are empty (`cache_occupancy`) and no state
packet carries a key. Each pipeline reports at most one key per cycle.

## Timing

- The ingress takes 2 cycles plus one per ingress array from the `rx`
  handshake to the traffic manager. The egress takes 1 cycle plus one per
  egress array from a queue pop to `tx_valid`.
- A queue push is visible at the head one cycle later.
- Each array does a read-modify-write in one cycle, so back-to-back packets
  to the same counter are exact.
- All resets are asynchronous and active-low. Memories are not reset; valid
  flags mask them.

## Departures and own choices

Where the published description is silent or inconsistent, this design
chooses the following:

- **Collisions.** The cache evicts the old key, as the cache algorithm and
  its discussion state. One later sentence says new keys are dropped on a
  collision; that reading is not followed.
- **Evicted keys.** The cache algorithm only says that the new key
  replaces the old one. Elsewhere, collisions are said to cause additional
  state packets that carry evicted keys to the arrays. This design does
  that with one-shot packets. How such a packet is created on a real switch,
  for example by mirroring, is left open.
- **Bitmap.** The bitmap is overwritten on a hit, as written. See the
  section on the cache and the bitmap.
- **Hash.** The hash function is not specified. `sp_hash` is an xor-shift
  and multiply mixer, seeded per array (`0x9e3779b9*(j+1)`) and for the
  cache (`0x5bd1e995`).
- **Counters.** Counters are 32 bits and saturate.
- **Bandwidth.** It is modelled as slot ratios only. One internal slot per
  eight normal slots stands for a 400 Gbps internal port beside eight
  400 Gbps ports. The eight ports are merged into one `rx` stream per
  pipeline.
- **Queue depths.** `NQ_DEPTH = 64`, `RQ_DEPTH = 4` and `EQ_DEPTH = 16`
  are assumed. The
  state queue size is explained under Buffers.
- **Router ties.** Among eligible arrays the lowest index wins. With a
  cyclic `PRED`, the lowest set bit is taken so that a packet cannot stall.
- **Recirculation slot.** How the recirculation slot is shared is this
  design's choice; see the section on state packets.
- **Generator start.** `gen_start` is a plain input. On the real switch the
  generator is set up from the control software.

Not built:
- update functions other than count-min's, such as the ±1 updates of
  UnivMon or count sketch and the heavy part of Elastic Sketch;
- the placement solver;
- the monitoring applications.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block
against a software model in `tb/tb_ref_pkg.sv`, which recomputes the hash
independently.

- `tb_sketchpipe_switch` is the end-to-end test at reduced sizes. It uses
  two switches side by side.
  - An exact switch must deliver exact per-flow counts to all four arrays
    and report heavy keys correctly. It uses 64-entry caches, 1024 counters
    and a visiting order of array 2 before array 3.
  - A stress switch must survive drops and a generator restart. It uses
    4-entry caches and 1- or 2-deep queues.
  - The test counts how often each of these mechanisms happens and fails if
    any of them never does: hit, insert, evict, skip, load, empty poll,
    state update, remote route, return home, recirculation, normal drop,
    state drop, heavy key, restart and flush report.
  - A second burst is cut off by a flush. For every flow and array, the
    counter plus the reported counts must equal the burst.
- `tb_sketchpipe_full` runs the top with every parameter at its default.
  Sixteen flows with fixed paths send traffic while four generators inject
  65,536 state packets each. It then polls until the sketch is complete and
  checks every counter of every flow, the estimate and the heavy flag. The
  caches drain in about 1.7 million cycles.
- `tb_sketchpipe_hh` is heavy-hitter detection on skewed traffic, at reduced
  sizes: 1024-entry caches, 4096 counters, 1024 flows with fixed paths and
  about 36,000 packets.
  - It compares the switch with an ideal count-min sketch on a single
    pipeline, using the same hashes.
  - With no evicted key lost, every estimate must equal the ideal one.
  - The F1 score for heavy keys, those above 0.5% of packets, must be at
    least 0.9 of the ideal's. It comes out at 1.000, with about 6% of
    packets causing evictions.
  - Keys that arrive outside the pipeline of arrays 2 and 3 all pass
    through that pipeline's one internal slot. The sketch is complete only
    well after the caches are empty.

## Simulating

With Verilator 5, for example for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
  --top-module tb_sketchpipe_switch \
  rtl/sp_pkg.sv tb/tb_ref_pkg.sv tb/tb_sketchpipe_switch.sv -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find the other modules by name. The package files
must come first on the command line. The full-size test
(`tb_sketchpipe_full`) builds the same way and runs in a few seconds.

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog.

Remaining lint warnings are expected and harmless:
- replication width on the 65,536-bit valid-flag clears;
- unused output pins: `generated`, `sel_array`, `drop` and `count`;
- the unused upper hash bits.
