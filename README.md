# HotCluster TSV links: cluster-level defect recovery for 3D-NoC vertical links

In a 3D network-on-chip, each router reaches the router on the layer above
through a bundle of through-silicon vias (TSVs). TSV defects tend to come in
clusters, often in hot regions, so a whole group of vias fails at once. A
small per-group spare budget cannot repair that. This RTL groups each
router's vertical link into **four TSV clusters**, one at each border of the
router. It adds **spare clusters**: one inside selected routers and, as an
option, one outside each border of the layer. It repairs a defective cluster
in one of three ways, in this order:

1. with the router's own redundant cluster;
2. by **borrowing** a healthy cluster from a neighbouring router of lower
   weight, which may in turn borrow from its own lower-weighted neighbours
   (a *borrowing chain* from hot routers towards cool ones);
3. when that still leaves fewer than four clusters, by degrading the link.
   The router time-shares a cluster it lent out (*virtual TSV*), serializes a
   flit over two clusters (2:1) or one cluster (4:1), or disables the link so
   the NoC's fault-tolerant routing goes around it.

The borrow decisions are made either online, by a small distributed hardware
algorithm in every router, or offline, by a host that solves a max-flow
problem and loads the result.

The block that ties it together is `hotcluster_layer_link`. It holds all the
up links between one `ROWS x COLS` layer and the layer above. On the lower die
it takes each router's up-port flits, and on the upper die it delivers them to
that router's down input. The routers themselves are not part of this RTL.

## Clusters, lanes and the cluster map

A flit is 44 bits wide (two SECDED(22,16) words). It is cut into four 11-bit
**chunks**: chunk *i* is `flit[11*i +: 11]`. A router's link has four logical
**lanes**, and in normal mode lane *i* carries chunk *i*. Physical clusters are
indexed 0-3 (the border clusters N, E, S, W) and 4 (the internal redundant
cluster).

`cluster_map` decides which physical cluster carries each lane, as follows:

* **Lending comes first.** Each neighbour the router lends to gets one of the
  router's healthy clusters: the redundant cluster if it is healthy, otherwise
  the highest-numbered healthy border cluster.
* **Then the lanes are filled.** The router's remaining healthy clusters take
  lanes 0, 1, ... in index order, and borrowed clusters take the next lanes.
* **The mode follows from the count.** With *k* lanes held outright and *L*
  clusters lent:

| condition | mode | beats per flit |
|---|---|---|
| k = 4 | `MODE_NORMAL` | 1 |
| k < 4, k + L ≥ 4 | `MODE_VIRTUAL`: the missing lanes ride on lent clusters, time-shared | 1 (after a grant) |
| k = 2 or 3 | `MODE_SERIAL2`: lanes 0 and 1, chunks {0,1} then {2,3} | 2 |
| k = 1 | `MODE_SERIAL4`: lane 0, chunk 0..3 | 4 |
| k = 0 | `MODE_DISABLED`: nothing is sent; `link_mode` tells the router to route around | – |

Virtual TSV is preferred over serialization whenever it gives four lanes.

The two switches apply the same map on both dies:

* **`tsv_tx_switch` (lower die).** It drives each own cluster with its lane.
  A cluster lent to neighbour *d* is driven with the lane that neighbour sends
  over on a lateral wire. A lane on a borrowed cluster is sent to its lender.
* **`tsv_rx_switch` (upper die).** It does the reverse, and forwards the
  contents of lent clusters to the neighbours that borrowed them.

Multiplexers stand in for the tri-state gates of the original circuit.

## Online cluster finding (the part worth reading first)

Each router has a `cluster_finder`, and the finders of neighbouring routers
talk over single-bit request/grant wires. A router is ordered by its **key**
`{weight, router id}`. The weight comes either from the placement flow
(`cfg_weight`, where hotter routers get higher weights) or from **SAWI**
(`use_sawi`). SAWI sets weight = 4 − unused healthy clusters, so a router
that has a spare to give looks cheaper. The router id only breaks ties.

Every cycle, each router does the following:

* **supply.** It computes supply = own healthy clusters + borrowed − lent.
* **request.** If supply < 4, it raises `req_out` towards exactly one
  neighbour. That neighbour has the lowest key among those below its own key
  that it has neither borrowed from, lent to, nor already given up on.
* **grant.** It grants at most one incoming request: the one with the highest
  key, provided it still owns a healthy cluster that is not yet lent. A router
  can lend even if that leaves it short; it then requests further down in
  later cycles. This is how borrowing chains form.
* **refused requests.**
  * A request refused because the neighbour had nothing left (its `can_lend`
    is low) marks that neighbour as *tried*.
  * A request refused only because the neighbour served someone else that
    cycle is repeated.

The process terminates for two reasons:

* borrowing only goes towards strictly smaller keys;
* between two neighbours at most one cluster ever moves, and in one direction
  only.

`map_ready` rises one cycle after no request is left anywhere in the layer.
After reset, or after a `remap` pulse (for example when the fault detector
reports a new defect), all borrow state is cleared and the search starts
again. Traffic is held while the map settles.

External spares (`EXT_RED=1`) look to a border router like a neighbour of key
0. Such a spare always grants if it is healthy (`ext_fault`), so placement
weights must be at least 1.

**Offline mapping.** With `offline=1`, the borrow decisions come from
`off_borrow`, where `off_borrow[i][d]` means router *i* uses one cluster of its
neighbour (or external spare) in direction *d*. Each router's lend set is
derived from its neighbours' entries. The intended source is a host that
solves the max-flow formulation:

* the source feeds each router with its number of missing clusters;
* each router drains to the sink with its number of spares;
* neighbours are joined by capacity-1 edges.

`tb/sweep_unit.sv` contains such a host model (Edmonds-Karp).

## Virtual TSV handshake and link timing

`tsv_serializer` sends one beat per cycle, and only while the receiver's Go
(`rx_ready`) is high. `flit_ready` to the router rises in the last beat of a
flit, so a link accepts one flit per cycle in normal mode, one per 2 cycles
in 2:1 mode and one per 4 cycles in 4:1 mode. `tsv_deserializer` rebuilds the
flit into a one-flit output register. Go is high while that register is empty
or being emptied in the same cycle.

A router in virtual mode raises `vreq` towards the borrowers of its lent
clusters while it has a flit, and sends once all of them grant. A borrower
grants in either of these cases:

* it has no flit and is not in the middle of one;
* it already refused the lender in the previous cycle, so the two alternate
  under load.

In a cycle in which it grants, the borrower does not send. During the granted
beat, the lent cluster carries the lender's lane on both dies. The control
wires (beat valid, Go, link mode and map) are taken to cross the dies on
fault-free TSVs.

## Top-level interface (`hotcluster_layer_link`)

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 4, 4 | layer size (router id = row·COLS + col) |
| `RED_MAP` | all ones | bit *i*: router *i* has an internal redundant cluster. All ones is the uniform "internal redundancy" placement. A thermal-aware placement flow would clear the bits of cool routers. |
| `EXT_RED` | 0 | one external spare cluster beyond each outward border of a border router |

| port | dir | meaning |
|---|---|---|
| `flit_in[i]`, `flit_in_valid[i]`, `flit_in_ready[i]` | in/in/out | up port of lower-layer router *i* (ready = Go) |
| `flit_out[i]`, `flit_out_valid[i]`, `flit_out_ready[i]` | out/out/in | down input of upper-layer router *i* |
| `tsv_fault[i][4:0]` | in | defect status of the border clusters [3:0] and the redundant cluster [4], from an online detector; in simulation it also breaks the TSV models |
| `ext_fault[i][3:0]` | in | defect status of the external spares |
| `remap` | in | pulse: clear and re-run the online mapping |
| `offline`, `off_borrow[i][3:0]` | in | use the host's borrow map |
| `use_sawi`, `cfg_weight[i]` | in | SAWI weights, or weights from the placement flow |
| `link_mode[i]` | out | `link_mode_e` of router *i*, for its routing logic |
| `borrow_map[i]`, `lend_map[i]` | out | current borrow and lend decisions |
| `map_ready` | out | mapping settled; links enabled |

Directions are N=0, E=1, S=2, W=3. North is row−1 and east is col+1.

At the defaults (4×4 layer with internal spares), coarse synthesis gives
about 10,000 word-level cells and 1,700 flip-flop bits. Most of the
flip-flops are the 44-bit assembly and output registers of the 16
deserializers. One `cluster_finder` has 12 flip-flops.

## Files

| file | contents |
|---|---|
| `rtl/hc_pkg.sv` | widths, `link_mode_e`, lane and cluster map types |
| `rtl/hotcluster_layer_link.sv` | the layer: per-router instances and the lateral wiring |
| `rtl/cluster_finder.sv` | online borrowing algorithm of one router |
| `rtl/sawi_weight.sv` | SAWI weight |
| `rtl/cluster_map.sv` | cluster maps and link mode |
| `rtl/tsv_serializer.sv`, `rtl/tsv_deserializer.sv` | beat framing, Stall-Go, virtual-TSV handshake |
| `rtl/tsv_tx_switch.sv`, `rtl/tsv_rx_switch.sv` | cluster switches on the two dies |
| `rtl/tsv_cluster.sv` | behavioural model of a TSV cluster with an injectable open defect (not synthesizable hardware: the real part is a process macro) |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the layer tests below |
| `tb/sweep_unit.sv` | helper for the defect-rate sweep, including the max-flow host model |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
From the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/hc_pkg.sv tb/tb_hotcluster_layer_link.sv \
  --top-module tb_hotcluster_layer_link -Mdir obj && obj/Vtb_hotcluster_layer_link
```

Replace the testbench name to run another one.

* **`tb_hotcluster_layer_link`** runs the layer at its default parameters.
  It covers three scenarios:
  * hand-placed faults that produce a disabled link, 4:1 and 2:1 serial
    links, a virtual-TSV lender, a router with all five clusters defective
    that borrows four, a borrowing chain and an internal repair;
  * an offline map;
  * SAWI weights.

  Each scenario carries scoreboarded random traffic under backpressure. The
  testbench also checks the one, two and four cycles per flit, and that each
  mechanism occurred.
* **`tb_hotcluster_ext`** runs the external-spare and hybrid placements.
* **`tb_defect_sweep`** (about a minute) maps random cluster defects at
  5–50% on 2×2, 4×4 and 8×8 layers with internal, external and hybrid
  spares. Each sample is mapped online (SAWI) and with the max-flow host
  model. For every sample it checks:
  * that the maps are consistent;
  * that the offline map leaves exactly "missing − max flow" clusters
    missing;
  * that the offline map never leaves more missing than the online map.

  It prints the share of routers per mode.

Results of the sweep, for comparison with published figures for this scheme:

* **4×4 internal spares, 20% defects.** Online/SAWI leaves about 6.5% of
  routers virtual, 2.5% serial and none disabled. This is close to the
  published 5.4% virtual, 1.1% serial and 0.01% disabled. The max-flow map
  gives 0% virtual, 5.4% serial and none disabled, against a published
  1.5%, 0.7% and 0%.
* **High defect rates.** Here the shares differ from the published ones. At
  50% on 4×4 with hybrid spares, this RTL keeps about 42% (online) and 40%
  (max flow) of routers normal, against the published 28% and 19%. The
  disabled share is 1.46% (online) and 1.25% (max flow), against a
  published 0.73% and 0.31%.
* **Virtual routers under the max-flow map.** The max-flow map as built
  here never leaves a router in virtual mode, because it only lends what
  is replaced. The published offline results do show a few, probably from a
  later assignment step that is not specified.

The sample counts are small (8–60 per point), so treat these as indications.

## How far this follows the published scheme, and where it does not

These follow the published scheme directly:

* four clusters per router link;
* optional internal and external spare clusters;
* borrowing only from lower-weighted neighbours, with chains;
* the mode order: virtual if four clusters are reachable, then 2:1, 4:1,
  fault-tolerant routing;
* the SAWI formula;
* the 44-bit flit;
* Stall-Go flow control.

The following are this design's own choices, since the scheme leaves them
open:

* the 11-bit split of the flit;
* the request/grant protocol, with one request and one grant per router per
  cycle;
* the tie-break by router id;
* which physical cluster is lent or used for which lane;
* the per-flit (not per-packet) virtual-TSV borrowing and its fairness rule;
* the one-flit receive register;
* mapping only on reset or `remap`.

Departures and omissions:

* **One signalling direction.** Only the up direction is modelled. The
  original clusters can also be driven downwards, and share spares between
  the two directions, through tri-state gates.
* **Router not included.** The router is not included: routing logic with
  look-ahead fault-tolerant routing, input buffers, wormhole switching and
  SECDED coding. Its up and down ports are the top's flit ports.
* **Weights and placement come from outside.** The thermal fault-rate
  prediction (an Arrhenius model) and the placement/weight algorithm are
  design-time software. They enter as `RED_MAP` and `cfg_weight`.
* **Offline solver not included.** The max-flow solver is host software; it
  exists here only as a testbench model.
* **Fault detection not included.** The online TSV fault detector is not
  included; `tsv_fault` stands for its output.
* **No baseline weighting.** The older "center priority" weighting, a
  baseline, is not built. Any weights can be given through `cfg_weight`.
* **TSV count per link.** The published comparison counts 176 TSVs per
  router link in a 4×4×4 network. This RTL models 44 data signals per link
  in one direction, plus 11 per spare.
