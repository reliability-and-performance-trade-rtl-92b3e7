# Wear-out aware routing for a four-layer 3D network-on-chip

In a 3D-stacked multicore, the vertical links between dies are bundles of
through-silicon vias (TSVs). A TSV that carries a lot of traffic ages: its
resistance, and so its delay, grows with use, until it no longer meets the
clock and counts as failed. Traffic in a stack is not uniform. With four
layers, the bundles between the second and third layers carry far more than
the others, and they fail first, which sets the lifetime of the whole chip.

This RTL implements a 64-core, four-layer network-on-chip whose routers
measure how much each TSV bundle has been used and steer traffic away from the
bundles that are used the most, so that wear spreads evenly over each region.
The scheme is called *prune-and-update*:

* **prune**: in each region of 16 bundles, a bundle whose accumulated
  utilization is more than one standard deviation above the region's mean is
  marked as pruned;
* **update**: routers stop choosing pruned bundles while another shortest path
  exists, and otherwise take a short planar detour to a neighbour's bundle.

Pruning costs a few extra hops for some packets; in exchange the hot bundles
age more slowly.

## Organisation

```
swnoc3d_top                       64 routers, 48 TSV bundles, 3 pruning regions
 ├─ noc_router  x64               7-port wormhole virtual-channel router
 │   ├─ vc_input_buffer  x7       4 virtual channels x 2 flits per port
 │   ├─ alash_route_unit          adaptive port / virtual-channel choice
 │   ├─ rr_arbiter                allocation arbiters
 │   └─ tsv_util_counter          active-cycle count of the bundle above
 ├─ tsv_link  x96                 one per bundle and direction
 │   ├─ tsv_serializer            36-bit flit -> 4 beats of 9 bits
 │   └─ tsv_deserializer
 └─ tsv_prune_unit  x3            mean + 1 standard deviation rule
noc_pkg                           flit type, sizes, topology, routing tables
```

Nodes are numbered x fastest, then y, then layer: node `n` is at
`x = n % 4`, `y = (n / 4) % 4`, layer `n / 16`. Bundle `t` (0..47) joins node
`t` and node `t + 16`; bundles 16..31 are the hot region between the second
and third layers.

Each router has seven ports: 0 local, 1 east (+x), 2 west (-x), 3 north (+y),
4 south (-y), 5 up, 6 down.

## Flits and packets

A flit is 32 data bits plus a 2-bit type (body, head, tail, head-and-tail) and
a 2-bit virtual-channel number, 36 bits on a link (`noc_pkg::flit_t`). A head
flit carries the destination node in bits 7:0, the source in 15:8 and the
*detour* flag in bit 16. The evaluated system uses 64-flit packets; the network
accepts any length, and single-flit packets use the head-and-tail type.

Flow control is credit-based per virtual channel. A sender starts with two
credits per channel (the buffer depth), spends one per flit, and gets one
back, with the channel number, whenever the receiver frees a slot. A network
interface on the local port follows the same rules: `inj_credit_*` return
credits for injected flits, and `ej_credit_*` must return one credit per
ejected flit.

## The router

Wormhole switching with four virtual channels of two flits on every input
port. A packet's head flit reserves an output virtual channel at each hop;
body flits follow it and the tail releases it.

Per cycle:

1. **Route and channel allocation.** A round-robin arbiter chooses one input
   channel whose front flit is an unrouted head. Its destination indexes the
   node's routing table, and `alash_route_unit` chooses an output port and an
   output channel. At most one head is routed per router per cycle.
2. **Switch allocation.** Each input port picks one of its routed channels
   that has a flit, a credit for its output channel and a ready link. Each
   output port then picks one of the input ports asking for it. Both stages
   are round robin.
3. The winning flit is written to the output register, with its channel field
   rewritten and, for a detoured head, the detour flag set. The freed slot
   goes back upstream as a credit in the same cycle.

A head flit leaves two clock edges after it reaches the front of its buffer;
body flits then follow one per cycle.

An output channel counts as free only when no packet holds it **and** its
downstream buffer has drained (all credits back). This atomic allocation
costs a little throughput. It means a packet never waits in a buffer behind
another packet, and the deadlock argument below relies on that.

## Routing: virtual layers, pruning, detours, escape

The routing table is derived at elaboration by breadth-first search over the
topology (`noc_pkg::build_route_tbl`). For every destination it gives two port
masks:

* the ports that lead one hop closer: the shortest-path ports;
* the planar ports that lead one hop farther: the detour candidates.

`alash_route_unit` makes the choice.

1. Shortest-path ports whose TSV bundle is pruned are removed. So is the port
   the packet arrived by: a packet never turns back.
2. If no shortest-path port is left and the packet has not detoured yet, the
   candidates become the unpruned detour ports. The packet goes one hop
   sideways, where the neighbour's own bundle takes it on, two hops longer in
   all. The flag in the head flit allows one detour per packet, so packets
   cannot wander.
3. If there is no detour either, the pruned bundle is used anyway. Pruning
   steers traffic but never blocks it.

**Virtual layers.** Each virtual channel is a virtual layer, and a packet
starts in layer 0. Layers 0 to 2 are adaptive. Among the candidate ports the
unit takes a free channel in the packet's current layer first, then a free
channel in a higher adaptive layer. A packet only ever moves upward, so it
never revisits a layer.

**Escape layer.** Layer 3 is an escape layer that routes in dimension order:
x, then y, then z, which is the lowest-numbered shortest-path port. It ignores
pruning. Dimension-order routing on a mesh has no cyclic channel dependencies,
and every blocked packet can always fall back to layer 3. Packets therefore
always drain, even though the adaptive layers may have dependency cycles.

Ports are tried in the fixed order local, east, west, north, south, up, down.

## TSV links and utilization

A vertical link serializes each 36-bit flit 4:1 onto nine TSV signals, least
significant beat first. The beats run at the router clock, so a TSV port
carries one flit every four cycles. Because the router registers its outputs,
it decides to send one cycle before the flit reaches the link; the link's
`send_ok` output looks one cycle ahead (at most two beats left and no flit
being offered now), so back-to-back flits still follow without a gap and no
flit is ever offered that the serializer cannot take. The flit appears at the far router four clock edges after
the serializer accepts it. Credits for vertical links travel on separate
signals.

The router below each bundle counts the cycles in which the bundle carries a
beat in either direction (`tsv_util_counter`). The count is cumulative,
because wear accumulates over the life of the via, and saturates at
2^32 - 1. `util_clear` restarts all counts.

## The pruning rule in hardware

Every `PRUNE_PERIOD` cycles (4096 by default), while `prune_enable` is high,
each of the three `tsv_prune_unit`s takes a snapshot of its 16 counts. It then
decides for each bundle whether `u > mean + std`, without dividing or taking a
square root. With `S = Σu`, `Q = Σu²` and `n = 16`:

```
u > mean + std   <=>   n·u − S > 0   and   (n·u − S)² > n·Q − S²
```

This holds because n² times the (population) variance equals `n·Q − S²`. The
unit accumulates `S` and `Q` over 16 cycles with one squarer, tests one bundle
per cycle for 16 more, then updates all flags at once. New flags take effect
2·16 + 1 cycles after the period ends, and `prune_done` pulses in that cycle.
The flag of bundle `t` drives `prune_up` of node `t` and `prune_down` of node
`t + 16`.

With `prune_enable` low, the flags are ignored and the network routes on
shortest paths only. This is the baseline the scheme is compared with.

## Top-level interface (`swnoc3d_top`)

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `prune_enable` | in | 1: prune-and-update; 0: shortest paths only |
| `util_clear` | in | restart all utilization counts |
| `inj_valid[64]`, `inj_flit[64]` | in | flits from each core |
| `inj_credit_valid[64]`, `inj_credit_vc[64]` | out | credits back to each core |
| `ej_valid[64]`, `ej_flit[64]` | out | flits delivered to each core |
| `ej_credit_valid[64]`, `ej_credit_vc[64]` | in | credits from each core |
| `tsv_util[48]` | out | active-cycle count per bundle |
| `tsv_pruned[48]`, `tsv_active[48]` | out | pruned flag, bundle busy this cycle |
| `prune_done` | out | pruning flags were just re-evaluated |
| `ev_avoided`, `ev_detour`, `ev_layer_up`, `ev_stall` `[64]` | out | per-router event pulses |

Parameters: `XD`, `YD`, `ZD` (4, 4, 4), `UTIL_W` (32), `PRUNE_PERIOD` (4096)
and `TSV_RATIO` (4). Router-internal sizes are in `noc_pkg`: `NUM_VC = 4`,
`BUF_DEPTH = 2` and `FLIT_DATA_W = 32`. The pruning region is always one
layer pair.

## What follows the original design and what does not

The following are taken from the design this RTL implements:

* 64 cores in four layers.
* 32-bit flits and 64-flit packets.
* Wormhole switching.
* Four virtual channels of two flits per port.
* 4:1 TSV serialization.
* A utilization counter in every router.
* The pruning rule: mean plus one standard deviation within a region.
* Avoiding pruned TSVs on shortest paths.
* Virtual layers that a packet never revisits.

The following are this design's own choices:

* **Planar wiring.** The original network is a small-world graph with
  long-range planar links whose wiring is not available here. Each layer is
  wired as a 4 x 4 mesh instead. The routing tables follow `noc_pkg::nbr`, so
  another graph only needs a new `nbr()`. The escape layer's dimension order
  would then have to be replaced by a deadlock-free order for that graph, such
  as up*/down*.
* **Layer assignment.** The original routing assigns each source-destination
  pair to a layer off-line, so that each layer has no dependency cycles. Here
  packets start in layer 0, climb when their layer is busy, and fall back to a
  dimension-order escape layer.
* **Region, period and counter.** A region is one layer pair, re-evaluated
  every 4096 cycles. Counts are cumulative.
* **Detour.** The one-hop planar detour when every shortest port is pruned.
* **Microarchitecture.** The pipeline, round-robin arbitration, credit flow
  control, the head-flit layout and atomic channel allocation.
* **Serialization clock.** The 4:1 serialization runs at the router clock,
  not on a faster serial clock.

Not modelled:

* The TSVs as physical parts: resistance growth, delay and failure.
* The serializer circuit.
* The cores.
* The benchmark traffic.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_router.sv \
          --top-module tb_noc_router -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_tsv_util_counter` | counting against random activity, clear, saturation |
| `tb_tsv_prune_unit` | the rule against a floating-point reference; 2N+1-cycle latency |
| `tb_tsv_link` | order and contents; latency; one flit per 4 cycles; active beats |
| `tb_vc_input_buffer` | four reference queues under random writes and reads |
| `tb_alash_route_unit` | directed and 20 000 random choices against a coordinate-based reference |
| `tb_noc_router` | one router from all seven ports (see below) |
| `tb_swnoc3d_top` | full 64-node network at default parameters (see below) |

`tb_noc_router` also checks:

* head latency;
* whole, in-order packets on shortest-path ports;
* TSV-port throttling;
* credit stalls;
* detours with the head flag set;
* moves to a higher layer.

`tb_swnoc3d_top` uses traffic skewed toward the middle layers, with four hot
bundles, and runs with pruning off and then on. It checks:

* every packet is delivered whole;
* every pruning decision matches a reference computation;
* every bundle's count matches the activity seen on it;
* serialization, stalls, layer moves, evaluations, pruning, avoidance and
  detours each happen at least once.

The full-size build is large: Verilator's C++ compile takes several minutes,
and the run then simulates about 13 000 cycles in a few seconds.
