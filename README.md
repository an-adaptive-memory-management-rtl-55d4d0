# CyNAPSE-style spiking network core with a reuse-score synaptic cache

A digital accelerator for spiking neural networks spends little energy on
arithmetic: neurons fire rarely and each spike only adds a handful of weights.
What costs energy is fetching, for every spike, the spiking neuron's
connectivity and weights from a large off-chip memory. This RTL implements an
event-driven spiking network core together with a cache that is managed from
the future rather than the past. The core's input events wait in a queue
before they are processed, so the hardware already knows which neurons will
need their synaptic data next. A lookahead engine reads those waiting events
and marks the cache blocks they will need with *reuse scores*. Replacement
then evicts the blocks with the fewest promised future uses instead of the
least recently used ones. Per-layer activity statistics extend the policy:
rarely active layers bypass the cache, and very active layers get their blocks
protected.

Everything is SystemVerilog 2017 in `rtl/` (synthesizable) and `tb/`
(self-checking testbenches and a behavioural main-memory model).

## How one biological timestep runs

The core simulates up to N = 16384 logical neurons with X = 16 physical neuron
circuits, each time-multiplexed over N/X = 1024 neurons. Spikes are AER
packets `{timestep[15:0], neuron_id[13:0]}`. The host streams the packets of
the input neurons (which are simulated off-chip) into the 256-entry input
queue, in non-decreasing timestep order. `system_controller` then steps time:

1. **Warm-up** (once per run). The event reader fills its lookahead window,
   so the cache already holds the data of the first events.
2. **Route inputs.** Every queued packet whose timestep has come is dequeued
   and handed to `synapse_router`. The phase ends when the head belongs to a
   later timestep, or when the queue is empty and `in_last` is high (the host
   has nothing more to send).
3. **Route internal spikes.** All spikes produced in the previous timestep,
   waiting in the auxiliary queue, are routed the same way.
4. **Update.** `neuron_array` sweeps all 1024 slots; in each cycle all X
   units update one logical neuron each. Spikes go through `spike_handler`
   into the auxiliary queue, where they wait for the next timestep.
5. **Tick.** The global timer advances. Every `batch_len` timesteps, and at
   the end of the run, `batch_end` refreshes the adaptive cache settings.

Each phase is a barrier: the next phase starts only when the previous one has
drained. One event is routed at a time.

## Synaptic data in main memory

Each spike needs three kinds of data, read in this order:

| item | address (64-bit words) | content |
|---|---|---|
| page pointer | `PTR_BASE + n` (`PTR_BASE = 2^22`) | `[24:0]` page base, `[56:32]` number of weights |
| topology row | `n*256 + w`, w = 0..255 | bit j of word w set if n connects to neuron 64w+j |
| weight page | `base + k` | k-th connection of n (ascending target id); signed weight in bits `[31:0]` |

Pages are variable-sized: a neuron with k connections owns exactly k words.
The router walks the 256 topology words of the row. For each set bit
(lowest first) it takes the next word of the page and adds the weight to the
dendritic SRAM of the target neuron. Target n belongs to unit `n mod 16`,
slot `n / 16`. Synaptic words are 8 bytes whatever the network's precision.
The placement of the three regions and the weight count in the pointer word
are this design's choices. The count lets the lookahead engine find the
extent of a page without scanning the topology row.

## The reuse-score cache (`reuse_cache`)

The cache is 256 KB, 4-way set-associative, with 64-byte blocks (eight words)
and 1024 sets. Only reads happen during inference. Each way holds a tag, a
valid bit and a 4-bit saturating **reuse score**: the number of future routes
known to need that block. The cache has two request ports.

**Read-time port** (`rt_*`). This port is driven by `event_reader`. When an
event is *read* from the queue (seen, not yet dequeued), the reader requests
the event neuron's pointer word, one word in each of its 32 topology blocks,
and one word in each block of its weight page.

| situation | action |
|---|---|
| hit | score + 1 |
| miss, a way is free | fill it, score 1 (compulsory miss) |
| miss, set full, `RT_CONSERVATIVE` | no replacement; the word is read from memory uncached |
| miss, set full, `RT_AGGRESSIVE` | replace the lowest-score way, score 1 |
| miss, set full, `RT_INTELLIGENT` | replace only if the lowest score < `reuse_thr` |

**Route-time port** (`ro_*`). This port is driven by the router when the event
is *dequeued* and actually routed.

| situation | action |
|---|---|
| hit | score − 1, on the first access to each block per event (`ro_dec`) |
| miss, layer bypassed | word read from memory, nothing allocated |
| miss | replace the lowest-score way (free ways first) with score `ro_ins_score`: 0 normally, or the layer's protection score |

Victim ties go to the lowest way. Scores saturate at 0 and 15.

**Lookahead window.** The reader keeps at most `lookahead` events (a
register, 64 after reset) between the queue head and its own pointer. Before
the run it fills this window. Afterwards each dequeue opens room for exactly
one new read-time event. If routing ever overtakes the reader, the reader
restarts at the head. Internal spikes never pass through the reader, because
they are routed in the very next timestep and so are not known far enough
ahead.

**Network-adaptive settings** (`activity_monitor`). Each routed event is
counted against its neuron's layer. `layer_lookup` finds the layer from the
compile-time id ranges. At each batch end:

* *Bypass.* A layer whose share of all events is below the activity bypass
  threshold `abt` (in units of 1/1024; 20 ≈ 2 %) is bypassed, if
  `dyn_bypass_en` is set. So are layers in the static mask (for example, an
  output layer). A bypassed layer's neurons get no read-time requests and no
  route-time allocation.
* *Protection.* If `dyn_protect_en` is set, a layer gets a probable reuse
  score that is inversely proportional to its mean reuse distance. That
  distance is estimated as `total_events × layer_neurons / layer_events`. The
  score is the largest p ≤ 15 with `p × total × neurons ≤ window × count`,
  i.e. the expected number of reuses within `window` events. Route-time
  misses of that layer insert their blocks with this score instead of 0.

Finding the scores takes at most 8 × 16 cycles after a batch end. The old
settings stay in force until then.

**Timing.** Both ports share one lookup pipeline. A request is accepted from
`IDLE` (the route-time port wins a tie). The tags are compared in the next
cycle, and the response pulse follows one cycle later. A hit therefore
answers 2 cycles after acceptance. A miss issues one 64-byte request on
`mem_*` (valid/ready) and answers the cycle after `mem_resp`. Serving the two
ports one at a time is this design's choice; it keeps score updates free of
races. The published architecture describes two independent ports.

## Neuron model (`neuron_unit`)

This is a generalized integrate-and-fire neuron with per-layer parameters:

```
if r > 0:   r -= 1; v = v_reset                       (refractory)
else:       v' = v + I - ((v - v_rest) >>> leak_shift)  (leak_shift = 0: no leak, IF)
            if v' >= theta + a: spike; v = v_reset; r = t_ref; a += a_inc
            else v = v'
every step: a -= a >> a_shift                         (a_shift = 0: no decay)
```

LIF, IF and adaptive-threshold neurons are settings of this one circuit. The
exact equations, the shift-based leak and the widths (32-bit v, 16-bit a,
8-bit r) are choices of this implementation. Layer 0 is the input layer:
it is simulated by the host, and its neurons are never updated.

## Modules

| file | role |
|---|---|
| `cynapse_pkg` | sizes, AER type, memory map, config types |
| `cynapse_top` | the core; all blocks below wired together |
| `config_regs` | host-written registers (map below) |
| `system_controller` | timestep phases, barriers, global timer, batch ends |
| `aer_event_queue` | input queue with a lookahead peek port |
| `aux_queue` | internal spikes for the next timestep (depth N: a neuron fires at most once per step) |
| `event_reader` | read-time lookahead engine |
| `reuse_cache` | the cache and its replacement policy |
| `synapse_router` | route-time lookup: pointer, topology, weights |
| `neuron_array` | 16 `neuron_unit` + 16 `dendrite_sram`, update sweep |
| `spike_handler` | spike buffer, stalls the sweep while it drains |
| `activity_monitor` | layer statistics, bypass flags, protection scores |
| `layer_lookup` | neuron id → layer |

## Top-level interface (`cynapse_top`)

* `cfg_we/cfg_addr[7:0]/cfg_wdata[31:0]`: register writes, one per cycle.
* `start` (pulse), `running`, `done` (pulse), `t_now`: run control.
* `in_valid/in_ready/in_ev`: the AER stream; `in_last` means no more packets
  for this run.
* `mem_req/mem_ready/mem_addr[21:0]`: block request to main memory.
  `mem_resp/mem_rdata[511:0]`: the returned block, word 0 in the low bits.
* `spk_out_valid/spk_out_id`: every internal spike as it enters the auxiliary
  queue.
* `stats[16]`: counters. Indices: 0 rt hits, 1 rt fills into free ways,
  2 rt replacements, 3 rt declined allocations, 4 ro hits, 5 ro misses,
  6 ro bypasses, 7 memory reads, 8 events read ahead, 9 events skipped
  (bypassed layer), 10 synapses routed, 11 spikes, 12 cycles waiting for
  input, 13 batch ends, 14 protected layers, 15 bypassed layers.

Register map: `0x00` [1:0] read-time approach (0 conservative, 1 aggressive,
2 intelligent), [2] dynamic bypass, [3] dynamic protection; `0x01` reuse
threshold; `0x02` lookahead; `0x03` timesteps per run; `0x04` ABT; `0x05`
protection window; `0x06` batch length; `0x07` static bypass mask; `0x08`
number of layers; `0x10 + 8l + k` for layer l: k = 0 first neuron id,
1 theta, 2 v_reset, 3 v_rest, 4 leak_shift, 5 t_ref, 6 a_inc, 7 a_shift.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
For example, the end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb --top-module tb_cynapse_top \
    rtl/cynapse_pkg.sv tb/tb_net_pkg.sv tb/tb_cynapse_top.sv -o sim
obj_dir/sim
```

`tb/tb_net_pkg.sv` defines a three-layer test network by formulas (64 input
neurons, 32 + 10 processing neurons). It also computes the memory image
encoding that network, which `tb/dram_model.sv` serves with a fixed latency.
`tb/tb_dbn_workload.sv` runs the full-size core on a deep-belief-network-shaped
workload (`tb/tb_dbn_pkg.sv`): 784 input neurons (a 28×28 image), fully
connected hidden layers of 500 and 500 neurons and 10 outputs, 647000
synapses. The weights and thresholds are synthetic, and 60 pixels spike per
timestep. In 5 timesteps the core routes about 2100 events and 600k synaptic
updates, and all 1010 processing neurons are checked at every step. The
simulation takes about 10 seconds. It prints the cache statistics and the
memory reads per routed event. A winner-take-all network of 784-400-400
neurons has the same structure and differs only in its sizes.

`tb_cynapse_top` runs the core at its default sizes in three runs
(intelligent with adaptation, then conservative, then aggressive). It compares
every internal spike of every timestep with a reference simulation. It also
requires each mechanism to occur: read-time hits, fills, replacements and
declined allocations; route-time hits, misses and bypasses; protected and
bypassed layers; batch ends; sweep stalls; lookahead. The host side streams
the packets concurrently with the core: in the first run it sends faster than
the core consumes, so the input queue fills and `in_ready` throttles it; in
the second run it pauses mid-run, so the controller waits for input. After
compilation the simulation itself takes about a second. Each block has its own testbench `tb/tb_<module>.sv`, with
hand-worked expectations (for example, `tb_reuse_cache` drives six blocks
through one set and checks every outcome, data word and hit latency).

## Choices and limits

* N = 16384 and X = 16 are not fixed by the architecture. N is large enough
  for a 13.6k-neuron network. Both are package constants.
* Queue depth (256), score width (4 bits), number of layers (8), lookahead
  and threshold values are this design's choices or run-time registers.
* The two cache ports share one pipeline (see above). The published
  architecture allows a read-time request to overlap a route-time one.
* The protection score's reuse-distance estimate is derived from event counts
  gathered in hardware. The original approach calibrated it from offline
  simulation statistics, with only the inverse proportionality stated.
* The activity statistics count every routed event, input and internal, per
  layer, inside the core and per batch. The original flow dumped the queue
  contents after each batch of examples and computed the statistics in
  software.
* Memories are register arrays; substitute SRAM macros for the dendritic,
  neuron-state, queue and cache arrays in an implementation. The neuron-state
  and dendrite arrays are cleared by reset, so they synthesize as flip-flops.
* Main memory (a 256 MB DDR3 device in the reference system) and the host
  processor are outside the RTL. `tb/dram_model.sv` stands in for the
  former, and the testbenches play the latter.
* Power and energy are not modelled. The `stats` counters provide the access
  counts from which cache and DRAM energy would be estimated.
