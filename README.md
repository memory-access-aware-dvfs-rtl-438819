# Memory-access aware DVFS network-on-chip

A chip multiprocessor's on-chip network uses a large share of the chip's power. A common remedy is
per-router dynamic voltage and frequency scaling (DVFS), driven by how busy each router is. Busy
routers run fast and idle ones run slow. Utilisation alone is a poor guide, though. A thread that
rarely misses in its L1 cache stalls on every miss, so slowing its packets costs real performance.
A thread that floods the network with stores may barely notice extra latency.

This design lets the memory behaviour of the threads steer the network. Each core's network
interface measures three numbers for its thread:

| symbol | meaning | format |
|---|---|---|
| ρ (rho) | average number of occupied MSHR entries, i.e. outstanding memory requests | 8 bit, Q6.2, 0 … 63.75 |
| γ_L1m | network-incurring L1 misses per instruction | 8 bit, Q0.8, saturating at 255/256 |
| γ_load | loads / (loads + stores), counting only network-incurring accesses | 8 bit, Q0.8 |

The interface sends these numbers along with the thread's packets. Every router keeps them in a
small table and uses them in two ways:

* **Voltage/frequency.** Once per *frame* (2^14 cycles) the router adds up, over its input ports,
  the largest ρ seen on each port. It then picks one of three operating points:

  | level | operating point | share of base-clock edges used |
  |---|---|---|
  | 0 | 1.5 V / 1.5 GHz | 6/8 |
  | 1 | 1.6 V / 1.75 GHz | 7/8 |
  | 2 | 1.7 V / 2.0 GHz | 8/8 |

* **Switch priority.** Each cycle the switch allocator prefers packets from older *batches*
  (arrival frames), which prevents starvation. Among packets of the same batch it prefers threads
  with a low miss rate (latency-sensitive) and a high load ratio (loads stall the core, stores
  usually do not).

The default configuration is an 8×8 mesh with these parameters:

* 5-port routers, each port with 6 virtual channels (VCs) of 4 flits.
* 128-bit flits, 8-flit data packets and 1-flit control packets.
* X-Y routing.
* 32 MSHRs per core.

## Block structure

```
memaware_noc                       mesh of MESH_X x MESH_Y tiles
 └─ per tile
     ├─ ni                         packetisation, piggybacking, ejection
     │   └─ mem_characterizer      sliding-window rho / gamma measurement
     │       └─ seq_divider (x2)   serial dividers for the two ratios
     ├─ router
     │   ├─ input_unit (x5)        VC buffers, route computation, credits
     │   │   ├─ vc_fifo (x6)
     │   │   └─ route_compute
     │   ├─ vc_allocator
     │   ├─ priority_sa            batch- and criticality-ranked switch allocation
     │   ├─ crossbar
     │   ├─ mac_table              per-VC (rho, gamma_L1m, gamma_load)
     │   ├─ cdc                    communication demand = sum of per-port max rho
     │   └─ dvfs_setting           frame/epoch/batch counter, level choice
     └─ vf_clock_enable            router clock enable for the chosen level
```

`noc_pkg` holds all shared constants, the flit and head-flit structs, and the fixed-point widths.

## Measuring a thread: `mem_characterizer`

The characterizer sees one set of event inputs per cycle from its core:

* the current MSHR occupancy;
* a flag for a network-incurring L1 miss;
* the number of instructions retired;
* flags for a network-incurring load or store.

Time is cut into epochs of 2^12 cycles. Four epochs make one characterisation window of 2^14
cycles, the same length as a frame. The window slides by one epoch.

The block keeps per-epoch sums for the last three completed epochs plus the running one. At each
epoch boundary it adds the four sums and produces a new parameter set:

* ρ is the window's occupancy sum divided by 2^14. That is a shift: the sum keeps 2 fraction bits.
* γ_L1m = misses·256 / instructions, and γ_load = loads·256 / (loads + stores). These are divided
  by two serial restoring dividers, which take W+1 cycles. That is ample, since the result is needed
  once every 4096 cycles. Both ratios saturate at 255. An empty denominator gives 0.

`params_valid` rises after the first full window and stays high.

## Carrying the numbers: piggybacking in `ni`

The parameters travel in the head flit of ordinary packets, so they cost no extra packets. The head
flit's 128 data bits are laid out as follows:

```
 127:124 dst_x | 123:120 dst_y | 119:116 src_x | 115:112 src_y | 111 flag |
 110:103 rho   | 102:95 gamma_L1m | 94:87 gamma_load | 86:0 payload
```

Outside the data bits, a flit carries a 2-bit type (head, body, tail, head+tail) and a 3-bit VC
number.

The NI keeps one "already sent" bit per destination node. All the bits are cleared whenever the
characterizer publishes a new parameter set. The first packet to each destination after that sets
`flag = 1` and carries the numbers. Later packets to the same destination carry `flag = 0`. Nothing
is flagged until the characterizer has a full window.

Messages enter through a ready/valid handshake (`msg_valid`, `msg_ready`, and `msg_*` fields). A
data message becomes 8 flits: the head flit carries the header and the first payload bits, and
seven more flits follow. A control message becomes one head+tail flit.

The NI picks, round-robin, a VC that has a free slot in the router's local input port. It
transmits under credit flow control. Flits for this node are passed straight to `rx_valid`/`rx_flit`
and credited back one cycle later. Flits from different VCs may interleave on that ejection link;
the VC number in each flit tells the packets apart.

## The router

### Pipeline

The router has two stages.

**Stage 1** does four things in parallel on the flit at the front of each VC:

* X-Y route computation for a head flit;
* VC allocation for the downstream router;
* switch allocation;
* demand computation.

**Stage 2** is switch traversal. The crossbar, set by this cycle's switch allocation, writes
straight into the output-link register.

Switch allocation is *speculative*. A head flit that has not yet been given a downstream VC bids for
the switch anyway. Its grant becomes a move only if VC allocation succeeds in the same cycle and the
newly granted VC has a credit. Otherwise that switch slot goes unused. The VC allocator applies
grants before releases. A single-flit packet can therefore take and free a downstream VC in the same
cycle.

Timing: a flit written into an input buffer on base-clock edge t is on the output link after edge
t+1. It is in the next router's buffer on edge t+2, when the router runs at full speed and wins
allocation. Credits are returned one cycle after a flit leaves a buffer.

Port numbering is 0 local, 1 east (+x), 2 west, 3 north (+y), 4 south. Flow control between
routers uses credits, one per buffer slot per VC.

### MAC table

The MAC (memory-access characteristics) table has one entry per input VC:
{valid, fresh, source node, ρ, γ_L1m, γ_load}.

* **Flagged head flit.** When it arrives, its parameters are written into its VC's entry. They are
  also written into every other entry that holds the same source, since all VCs used by one thread
  share one set of numbers.
* **Unflagged head flit.** It copies the numbers of another entry with the same source, if there is
  one. Otherwise the entry becomes invalid.
* **Staleness.** Every epoch boundary clears the `fresh` bit. An entry that is still not fresh at the
  next boundary is invalidated. Numbers from a thread that stopped talking through this router
  therefore vanish after one to two epochs.

An invalid entry counts 0 towards demand and gets the middle priority rank.

### Demand and DVFS setting (`cdc`, `dvfs_setting`)

`cdc` computes the demand, registered:

```
demand = Σ over input ports p of max over valid VCs k of ρ[p][k]
```

The full scale is `DEMAND_MAX = N_PORTS · MSHR_ENTRIES · 4 = 640`. That is one completely full
32-entry MSHR per input port, in Q6.2.

`dvfs_setting` owns a free-running counter on the base clock. It provides three signals:

* `epoch_tick` every 2^12 cycles;
* `frame_start` every 2^14 cycles;
* a 2-bit `batch_id` that increments every frame.

At each frame start the demand range is cut into three equal segments. The new level is the
highest `i` with `demand · 3 ≥ i · DEMAND_MAX`. `vf_tune` pulses only when the level actually
changes, so a steady demand causes no regulator transitions. The router starts at level 0, the
lowest.

### Priority-based switch allocation (`priority_sa`)

Every requesting VC gets an 11-bit key:

```
key = { batch age (2 bits) , score (9 bits) }
age   = current batch_id − batch_id stored with the flit on arrival (mod 4)
score = (255 − γ_L1m) + γ_load        (0 … 510; invalid entry → 255)
```

Allocation is separable:

1. Each input port picks its VC with the largest key.
2. Each output port picks, among the input winners that want it, the largest key.

Equal keys are broken by round-robin pointers, which advance on a grant. The age occupies the
most-significant bits, so an older batch always wins over a newer one. That bounds how long a
low-priority packet can wait. With 2 bits the order is exact for packets up to three frames old.

## Per-router frequency as a clock enable (`vf_clock_enable`)

A real chip would give each router its own regulator and clock. Here all routers share one 2.0 GHz
base clock, and the chosen level is turned into a clock enable that swallows edges: level 0 uses 6
of every 8 edges, level 1 uses 7 of 8, and level 2 uses every edge. These are exactly the ratios
1.5/2, 1.75/2 and 2/2.

Inside the router:

* Input buffers accept flits on every edge, so links need no synchronisers.
* Output flits and credits are one-cycle pulses.
* All allocation, VC and credit state advances only on enabled edges.
* The frame counter runs on the unscaled clock, so all routers' frames stay aligned in time.

Supply voltage and the regulator's transition time are not modelled. `vf_level` and `vf_tune` are
outputs for an external regulator.

## Top level: `memaware_noc`

`memaware_noc` builds the mesh with a generate loop. Each tile holds an `ni`, a `router` and a
`vf_clock_enable`. Tile coordinates are passed to the router and NI as inputs. The tile at (x, y)
is array index `y·MESH_X + x` in all per-node ports. Mesh-edge ports are tied off.

The core side has four groups of ports:

* message injection: `msg_*`;
* ejection: `rx_*`;
* the characterizer events: `ev_mshr_occ`, `ev_l1_miss`, `ev_inst`, `ev_ld_net`, `ev_st_net`;
* per-node observation outputs: `vf_level`, `vf_tune`, `demand`, `params`, `params_valid`.

Cores, caches, memory controllers and the voltage regulators are not part of the RTL. They connect
through these ports.

## Parameters

| parameter | default | where |
|---|---|---|
| `MESH_X`, `MESH_Y` (`MX`, `MY` on the top) | 8, 8 | `noc_pkg`, `memaware_noc` |
| `N_PORTS`, `N_VCS`, `VC_DEPTH` | 5, 6, 4 | `noc_pkg`, `router` |
| `FLIT_W`, `DATA_PKT_FLITS` | 128, 8 | `noc_pkg` |
| `FRAME_LOG2` (`FLOG2`), epoch = frame/4 | 14 | `noc_pkg`, `router`, `memaware_noc` |
| `N_LEVELS` | 3 | `noc_pkg` |
| `MSHR_ENTRIES` | 32 | `noc_pkg` |
| `RHO_W`/`RHO_FRAC`, `GAMMA_W` | 8/2, 8 | `noc_pkg` |

The testbenches shorten the frame (for example `FLOG2 = 8`) so that several frames fit in a short
simulation.

## Simulation

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. Example with plain verilator, run from
the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_router.sv --top-module tb_router -Mdir obj_router
./obj_router/Vtb_router
```

| testbench | what it checks |
|---|---|
| `tb_route_compute` | every (current, destination) pair of an 8×8 mesh |
| `tb_crossbar` | random settings against a reference mux |
| `tb_seq_divider` | random quotients, latency of W+1 cycles |
| `tb_vf_clock_enable` | edge counts per 8 cycles for each level |
| `tb_cdc` | random tables against the sum-of-max formula |
| `tb_dvfs_setting` | segment thresholds, retune only on change, epoch/frame/batch timing |
| `tb_mac_table` | flagged writes, sharing by source, copy on unflagged heads, ageing |
| `tb_vc_allocator` | one grant per output, lowest free VC, busy/release |
| `tb_priority_sa` | batch age first, then score, round-robin among equals, grant legality |
| `tb_input_unit` | buffering, route, credit return with the right VC |
| `tb_mem_characterizer` | ρ, γ_L1m, γ_load over a sliding window against a software model |
| `tb_ni` | packet formats, flag set once per destination per window, credits |
| `tb_router` | single router at full port/VC count: 2-cycle latency, random traffic with random clock enable and back-pressure, delivery order per packet, priority order, the level going up and down |
| `tb_memaware_noc` | 2×2 mesh end to end (see below) |

`tb_memaware_noc` drives random core traffic (data and control messages, random destinations, random
MSHR and miss events) through a heavy phase, an idle phase and a drain. It checks that every packet
arrives at the right node with its full length and its tail last, and that every flit belongs to its
packet.
It also counts each mechanism in every router and fails if any of them never happened:

* piggybacked heads and MAC table writes;
* speculative moves;
* switch contention and older-batch wins;
* level raises and level drops;
* cycles spent slowed;
* injection back-pressure.

### What has been simulated

The largest configuration simulated end to end is the 2×2 mesh with all router parameters at their
defaults (5 ports, 6 VCs, 4-flit buffers, 128-bit flits) and a frame of 2^8 cycles. A single router
is simulated at its full default size in `tb_router`.

The default 8×8 mesh compiles and lints, but it was not simulated. Verilator generates separate
scheduling code for each of the 64 router instances. Already at 4×4 the C++ build took about ten
minutes, so a full 8×8 build with a run of one 2^14-cycle frame does not fit a practical
test time. The mesh is a regular array of the same tile, and the tile is exercised in the 2×2 test.

## Where this design departs from, or fills in, the original proposal

* **Definition of ρ.** ρ is described both as the average number of requests in the MSHRs and as
  "network requests per window". The MSHR-occupancy average is used. The demand's full scale is
  taken as one full MSHR per input port rather than "one request per cycle per port".
* **Priority combination.** The way low γ_L1m and high γ_load combine into one priority is not
  given. The additive score above is this design's own.
* **MAC table ageing.** Ageing of table entries after one to two epochs is a design choice.
* **Frequency.** The V/F level is applied as a clock enable on a shared clock rather than separate
  clock domains. Voltage and transition latency are not modelled.
* **Speculative switch allocation.** Speculative requests have no lower priority than
  non-speculative ones, and a failed speculation wastes the switch slot.
* **Field widths and encodings.** Credit flow control, ready/valid core interfaces, port numbering,
  field widths, fixed-point formats and the 2-bit batch id are not specified by the proposal.
* **Packet routes.** Piggybacking is done once per destination per window, which reads "packet
  route" as source-destination pair.
