# Vertical wormhole switching in a 3D NoC-bus hybrid

This is RTL for a three-dimensional network-on-chip. It is a stack of 2D mesh
layers, and the layers are joined by short vertical buses built from
through-silicon vias (TSVs). The design is built around **bus virtual channel
allocation (BVA)**. Before a packet enters a vertical bus, its head flit reserves
a free virtual channel (VC) in the router it is going to on the target layer.
Once that reservation exists, the packet's flits cross the bus one by one,
interleaved with flits of other packets. The whole packet never has to be
collected in front of the bus. In other words, wormhole switching continues
across layers.

Why this is hard: in a plain mesh, every output port talks to one neighbour,
so it can track that neighbour's VCs itself. A vertical bus is different. It
links one router on each layer, so the receiving port of a layer is contended
by all other layers. BVA solves this by making the reservation a short,
pillar-wide, once-per-packet transaction. At most one reservation is granted
per cycle and per pillar. That costs little because a packet needs it only once
per hop, and it needs only a handful of TSVs.

The default configuration is 4×4×4 routers, 4 VCs per port, 32-bit flits,
8-flit packets and the pipelined vertical bus.

## System organisation

```
 layer z:   4x4 mesh of vc_router   (ports LOCAL, XP, XM, YP, YM, UD)
                     |  UD out              ^ UD in (two write channels)
                     v                      |
 pillar (x,y): updown_buffer -> data bus (pip_bus or tdma_bus) -> next layer's UD input
               bva_unit (one per layer) <-> bva_arbiter (one per pillar)
```

* `noc3d_top`: NZ layers of NX×NY routers. Mesh neighbours are joined by flit
  and credit wires. Each (x,y) position has its own `bva_pillar`, and routers
  do not share a bus. The LOCAL port of every router is brought out for the
  processing units.
* `vc_router`: a 6-port input-queued wormhole VC router with XYZ routing. A
  packet first corrects x, then y, and then leaves through UD to its target
  layer. The bus is a single hop to any layer, so a packet crosses layers at
  most once.
* `bva_pillar`: everything vertical at one (x,y). Per layer it has an
  `updown_buffer` and a `bva_unit`. Per pillar it has one `bva_arbiter`, the
  shared BVA buses and the data bus.

## How a packet changes layer (the BVA transaction)

This is the central mechanism. Each step below is one combinational path
inside a single clock cycle; the results are stored at the clock edge.

1. The packet has finished its planar hops. The router's UD output port gives
   it a VC of the **UPDOWN buffer** in the ordinary way: output VC allocation
   and credits. The UPDOWN buffer is a 4-VC, 4-flit-per-VC buffer that sits
   between the router and the bus.
2. When the head flit reaches the front of its UPDOWN-buffer VC, it raises
   `va_req` for that VC. It does so only if the target layer currently reports
   `free_vc_exist`. Every layer's UD input port drives one `free_vc_exist` wire
   into the pillar, meaning "at least one of my VCs is unreserved".
3. The `bva_unit` of the source layer picks one requesting VC with a V:1
   round-robin arbiter. It sends the OR of all requests to the pillar's
   `bva_arbiter` as `bva_req`.
4. The `bva_arbiter` grants one layer per cycle (round-robin) and raises
   `bus_granted`.
5. The granted layer drives the packet's target layer number onto
   `Target_layer_bus`.
6. Every layer compares `Target_layer_bus` with its own number. The matching
   layer takes the lowest free VC from its free VC list and drives that VC's
   index (the VCID) onto `BVA_result_bus`.
7. At the clock edge, the source stores the VCID and target layer in that
   UPDOWN-buffer VC's registers. The target marks the VC busy, and its
   `free_vc_exist` updates.

From the next cycle on, the UPDOWN-buffer VC may send flits. Each flit goes
onto the bus with the target layer beside it, and its `vc` field is replaced by
the reserved VCID. The reservation ends when the tail flit leaves the UPDOWN
buffer. The target VC is released, and goes back on the free list, when the
target router forwards the tail flit out of its UD input VC (`ud_release`).

Each UD input VC is 8 flits deep, exactly one packet. So a reserved VC can
always absorb every flit of its packet. This has two consequences:

* the bus needs no credits back from the target routers;
* a flit that reaches its target layer is ejected immediately, never stalled.

Flits of different packets therefore share the bus freely. No packet can block
the bus while it waits for a VC, because that wait happens before the packet
enters the bus.

The shared BVA lines of a pillar are `NL` × `bva_req`, `NL` × `free_vc_exist`,
`bus_granted`, a 2-bit `Target_layer_bus` and a 2-bit `BVA_result_bus`. That is
13 vertical control wires for 4 layers and 4 VCs, plus the one-hot grant lines
from the arbiter. The buses are tri-state in a physical implementation. Here
each is an OR of enable-gated drivers; only the granted layer and the target
layer drive.

## Vertical data bus

Two bus types are provided. `BUS_KIND` on `noc3d_top` and `bva_pillar`
selects one.

**Pipelined bus (`pip_bus`, `BUS_KIND = 0`, default).** The bus has one
stage per layer and two unidirectional lanes. Between neighbouring layers, each
lane has a 4-flit Bus_FIFO. At each layer a lane works like this:

* a flit at the head of the incoming FIFO that is addressed to this layer is
  ejected into the router's UD input at once;
* any other head flit passes on;
* the stage chooses between that passing flit and the flit the local UPDOWN
  buffer offers;
* the two alternate: after a passing flit the local flit has priority, and
  after a local flit the passing traffic does;
* a full downstream FIFO holds both.

A flit crossing d layers on an idle bus is ejected d cycles after it was
injected. `up_ready`/`down_ready` depend only on FIFO state and the stage
priority, so the UPDOWN buffer can choose its flit in the same cycle.

**TDMA bus (`tdma_bus`, `BUS_KIND = 1`).** Each lane is one shared wire bundle.
Every cycle, each lane's round-robin arbiter gives the slot to one layer that
has a flit for that direction (`have_up`/`have_down`). The flit is registered
and appears at its target layer one cycle later. Slots belong to single flits,
not to whole packets.

With either bus, both lanes can deliver to the same layer in one cycle. They
always write different VCs, because every VC was reserved by a different
packet. For this reason the router's UD input port has two write channels
(`in_*[UD]` from the upward lane and `ud_in2_*` from the downward lane).

## Router

`vc_router` is a conventional input-queued VC router.

* **Input buffers:** per input port, 4 VCs. They are 4 flits deep, or 8 on the
  UD port.
* **VC allocation:** runs in two stages. A V:1 round-robin arbiter per input
  port picks one head flit whose output port has an idle VC. A P:1 round-robin
  arbiter per output port picks one input port. The winner gets the
  lowest-index idle output VC.
* **Output VC state:** every output VC runs idle → active (allocated) →
  wait (tail flit sent) → idle (all credits back).
* **Switch allocation:** the same separable V:1 / P:1 scheme. A VC competes
  only while it has a flit and at least one credit for its output VC.
* **Timing:** the head flit appears on the output 3 cycles after it was
  presented at the input (buffer write, VC allocation, switch allocation into
  the output register). Body flits follow one per cycle.
* **Credits:** `credit_out` pulses one cycle after a flit leaves an input VC.
  Each output port counts credits per VC: 4 for mesh neighbours, 4 for the
  UPDOWN buffer, 4 for the LOCAL sink.
* **Position:** comes in on the `my_x`/`my_y`/`my_z` straps, so all routers
  are the same tile.

## Buffers and sizes

| Buffer | VCs | Depth (flits) | Where set |
|---|---|---|---|
| Planar input VC | 4 | 4 | `noc_pkg::VC_DEPTH` |
| UD input VC (receives from bus) | 4 | 8 = packet length | `noc_pkg::UD_IN_DEPTH` |
| UPDOWN buffer VC (towards bus) | 4 | 4 | `noc_pkg::UD_BUF_DEPTH` |
| Bus_FIFO, per lane and layer gap | 1 | 4 | `noc_pkg::BUS_FIFO_DEPTH` |

The UD input depth must be at least the longest packet. The vertical
no-credit scheme depends on it.

## Flit format

`noc_pkg::flit_t` has 36 bits: a 2-bit type, a 2-bit VC index and 32 data
bits.

* **Type:** `F_HEAD`, `F_BODY`, `F_TAIL`, or `F_HEADTAIL` for single-flit
  packets. Bit 0 marks a head flit and bit 1 a tail flit.
* **Head flit address:** `data[1:0]` is the destination x, `[3:2]` y and
  `[5:4]` z. The rest is payload.
* **VC index:** on a link, it names the VC in the receiving buffer.
* **On the bus:** a flit is a `bus_flit_t`, which adds the 2-bit target layer.

## Top-level interface

`noc3d_top` has `clk`, `rst_n` (asynchronous, active low) and one LOCAL port
per router, as arrays indexed `[z][y][x]`:

* `loc_in_valid`, `loc_in_flit`, `loc_in_credit[NVC]`: from the processing
  unit. The sender picks the input VC in `loc_in_flit.vc` and keeps 4 credits
  per VC. It must not interleave two packets on one VC.
* `loc_out_valid`, `loc_out_flit`, `loc_out_credit[NVC]`: to the processing
  unit. `loc_out_flit.vc` is the output VC that carries the packet. The
  receiver returns one credit per flit and has room for 4 flits per VC.

Everything runs on one clock.

## Departures and limits

* **Single clock domain.** The scheme allows the layers, the buses and the BVA
  logic to run in separate clock zones, for example a bus at twice the router
  clock. No clock-crossing logic is included. Everything, including the bus,
  runs at the router clock.
* **No bus sharing.** Topologies where one bus serves 2 or 4 routers per
  layer are not implemented; every router has its own pillar. In such
  topologies, for example a cluster mesh where diagonal neighbours relay
  through each other, packets may only move straight up or down.
* **Single-cycle BVA.** The request–grant–VCID sequence is completed in one
  cycle. In silicon the path spans the stack; a multi-cycle version would need
  `free_vc_exist` to stay valid across the handshake.
* **Own choices where the scheme leaves detail open:** round-robin arbitration
  everywhere, lowest-index VC from free lists, the flit sideband and address
  layout, the bus stage priority rule, and the router's pipeline timing.
* **Fixed sizes:** mesh size, VC count, flit width and packet length are
  package constants in `noc_pkg`, because they set struct widths. Up to 4
  layers fit the 2-bit z fields. More layers need wider `Z_W` and a changed
  head-flit address layout.
* **Not included:** processing units and network interfaces. The LOCAL ports
  are the boundary.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it establishes |
|---|---|
| `tb_bva_arbiter` | one-hot grant only to requesters, `bus_granted`, matches a round-robin model, fair rotation |
| `tb_bva_unit` | source and target sides against a reference model: V:1 choice, `Target_layer_bus` drive, VCID hand-over, free-list pick, `free_vc_exist`, release |
| `tb_updown_buffer` | `va_req` gating by `free_vc_exist`, no flit before its VCID, tagging with layer and VCID, lane/ready rules, credits |
| `tb_pip_bus` | delivery at the right layer and lane, order per source/target pair, FIFO full and stage contention occur, idle latency = layers crossed |
| `tb_tdma_bus` | one slot per lane per cycle, only to requesters, delivery one cycle later at the right layer, order |
| `tb_vc_router` | XYZ port choice, wormhole integrity per output VC, credit limits, UD releases, 3-cycle head latency and 1 flit/cycle after it |
| `tb_bva_pillar` | both bus types: every packet arrives whole at its target layer, no two packets ever share a UD input VC, no VC overflows; full UD ports and competing BVA requests occur |
| `tb_noc3d_top` | the full 4×4×4 system with uniform random, localized and hot-spot traffic (1792 packets): every packet delivered once, in order, to the right node; counts BVA grants, competing BVA requests, full UD input ports, flits passing bus stages, full Bus_FIFOs, stage contention and dual-lane ejection, and fails if any never occurred |
| `tb_noc3d_top_tdma` | the same three traffic phases on the full system built with the TDMA bus (`BUS_KIND = 1`): delivery, order and destination checks; counts BVA grants, competing BVA requests, full UD input ports and dual-lane ejection |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/noc_pkg.sv \
    tb/tb_noc3d_top.sv --top-module tb_noc3d_top -j 4
./obj_dir/Vtb_noc3d_top
```

Replace the testbench name for the others. The full-system testbench takes a
few minutes to compile, because it builds 64 routers and 16 pillars. It then
runs in seconds.
