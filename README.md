# Runtime-reconfigurable mesh network on chip

A network on chip (NoC) that gets smaller or larger while it runs. The design is a 4x4 mesh
of virtual-channel routers in the style of the CONNECT FPGA NoC. Each router can be switched
off at runtime, for example while its area of an FPGA is being partially reconfigured. The
remaining routers keep delivering packets. A global map with one bit per router says which
routers are on. Connectivity switches cut off the routers that are off. The XY routing of
every router looks at its four neighbours and sends packets around any neighbour that is off.

This trades throughput for area. A 16-router network can run as a 4x3, 3x3, 3x2, 2x2 or 2x1
mesh, or as an irregular shape with single routers missing. The area freed by the routers
that are off can be used by other logic. The main configuration is a 4x4 mesh with 2 virtual
channels (VCs), 4-flit buffers per VC and credit-based flow control. The alternative studied
for this kind of network, peek (busy-signal) flow control, is a parameter.

The RTL also contains the traffic environment used to evaluate such a network: a packet
generator and a credit-returning receiver on every node. It also contains a second,
unrelated piece: the convolutional encoders (WiFi and 3G) of a software-defined-radio chain.
These encoders are the modules that partial reconfiguration swaps in that experiment.

## Network structure

```
            reconf_noc_top
 ┌──────────────────────────────────────────────────────────────┐
 │  packet_gen[n] ──inj──►┌────────────── connect_mesh ───────┐ │
 │  credit_sink[n]◄──ej───│ network_map (active word)         │ │
 │                        │ connect_router[y][x]  x 16        │ │
 │                        │ link_switch per directed link x 48│ │
 │                        └───────────────────────────────────┘ │
 │  conv_encoder (WiFi K=7 r1/2)   conv_encoder (3G K=9 r1/3)   │
 └──────────────────────────────────────────────────────────────┘
```

* Node `n` sits at column `x = n % 4` and row `y = n / 4`. Row 0 is the north edge.
* Bit `n` of the active word is node `n`, so `fffe` switches corner 0 off and `7fff`
  switches corner 15 off.
* The word `0777` keeps the 3x3 mesh in the north-west corner.
* `0fff` keeps rows 0 to 2, a 4-wide by 3-high mesh.

### Flits and links (`noc_pkg`)

Every packet is a single flit (`flit_t`). A flit holds these fields:

* `valid`
* `detour`: used by the routing, see below
* `vc`: 3 bits
* `dst_x` and `dst_y`: 2 bits each
* `data`: 32 bits

A flit stays on its VC from source to destination, and routers do not reassign VCs. These
field widths limit the RTL to a 4x4 mesh with at most 8 VCs.

A link has two parts:

* **Forward:** one `flit_t` per cycle.
* **Backward:** `NUM_VC` flow-control wires.
  * With `FC_CREDIT`, a wire pulses for one cycle each time the receiver frees a slot on
    that VC.
  * With `FC_PEEK`, a wire is a level meaning "busy".

The user port of each router uses exactly the same protocol.

## Router (`connect_router`)

The router has five ports, LOCAL, N, E, S and W. It handles a flit in one pass:

1. **Input queues.** Each input port has one `flit_fifo` per VC, `BUF_DEPTH` deep. A flit
   arriving during cycle *t* is in its queue at the edge that ends *t*.
2. **Routing.** The flit at the head of every queue is routed by a `route_unit`. This is
   combinational logic on the destination, the detour bit and the four neighbour-active bits.
3. **Separable allocation, input first.** Each input port picks, round robin, one VC whose
   head has space downstream on its chosen output. Then each output port picks, round robin,
   one of the input ports asking for it. An input that loses waits, and its VC pointer does
   not advance.
4. **Crossbar and output register.** A winning flit is popped and registered onto the output
   link. Its VC's credit counter in `out_flow_ctrl` is decremented.

With no contention, each router adds 2 cycles. A flit injected at cycle *t* reaches the
destination's user port at *t + 2·(hops + 1)*, because it crosses hops + 1 routers. Both the
router and the mesh testbench check this: 2 cycles through one router, 14 cycles from node 0
to node 15.

**Flow control.**

* **Credit.** The sender keeps one counter per VC, starting at `BUF_DEPTH`. The receiver
  returns a credit in the same cycle it pops a flit.
* **Peek.** The receiver raises busy for a VC when that queue holds `BUF_DEPTH-1` flits or
  more. The sender sees the busy level one cycle late, so up to two flits can be in flight;
  the threshold leaves room for both. Peek therefore needs `BUF_DEPTH >= 2`.

## Runtime reconfiguration

Four mechanisms work together.

1. **Network map (`network_map`).** This register holds the active word. After reset all
   routers are on. Writing `cfg_data` with `cfg_we` takes effect on the next cycle. From the
   word the map derives each router's own bit and its N/E/S/W neighbour bits. A neighbour
   outside the mesh reads as off. Routers only know about their direct neighbours, so routers
   next to each other should not be reconfigured at the same time. `cfg_err` flags a write
   that changed two adjacent routers; the write is still applied.
2. **Switching a router off.** A router whose bit is 0 empties its queues, drives idle
   outputs and accepts nothing. Its neighbours refill their credit counters for it, so it
   comes back as an empty router with a full set of credits.
3. **Connectivity switches (`link_switch`).** Each directed link carries traffic only while
   both of its end routers are on. Otherwise the switch forces an idle flit forward. Backward
   it forces "no credit" (credit flow control) or "busy" (peek). Nothing a router drives while
   it is being reconfigured reaches a working router.
4. **Surround routing (`route_unit`).** This is the part most worth understanding before
   changing the RTL.
   * With all neighbours on, routing is plain XY: first along X, then along Y.
   * **X move blocked.** The flit takes its Y move if it still needs one. On its destination
     row it steps to an active vertical neighbour, north first. The next router routes XY
     again and passes beside the obstacle.
   * **Y move blocked in the destination column.** The flit steps sideways, east first, and
     sets the `detour` bit. A router routes a flit with `detour` set Y-first, so it is not
     sent straight back into the blocked column. The bit is cleared at the flit's next X move.

   A rectangle of active routers never blocks an XY path, so detours happen only in
   irregular maps.

### Limits of runtime reconfiguration

* **Drain before switching a router off.** Flits held in a router that is switched off are
  lost. So are flits already addressed to it. The testbenches stop traffic and drain the
  network before every map change. The generators drop a waiting packet whose destination
  has been switched off.
* **Which irregular maps are safe.** Simulation shows the surround routing is reliable when
  the routers that are off lie on the mesh boundary and do not touch each other. Examples
  are `fffe`, `fffd`, `efff`, `7fff`, `7ffe` and `bffd`.
* **Interior routers off.** The turns around a switched-off router inside the mesh can form
  a cycle of waiting buffers. For example, `ffdf` (node 5 off) deadlocks at 50 % load.
* **Touching routers off.** Two routers that are off and touch, even diagonally, can trap a
  flit at a dead end.
* **Regular maps are always safe.** The regular sub-meshes (4x3 … 2x1) use plain XY routing
  and have neither problem.

## Traffic environment and measured throughput

`packet_gen` behaves as follows:

* Each cycle, with probability `traffic_pct`/100, it creates a packet.
* The destination is uniform among the other active nodes, and the VC is random.
* The packet waits in a one-entry register until the router has space on that VC.
* While a packet is waiting, no new one is created. At high density the offered load is
  therefore limited by what the network accepts.

`credit_sink` accepts every flit and returns the credit the next cycle. It counts packets in
total, per VC and misdelivered.

`tb_reconf_noc_top` prints the throughput: packets delivered per cycle per *active* node, at
the default parameters. Each run uses a 3000-cycle window after warm-up, at 80 % traffic
unless stated:

| active map | throughput |
|---|---|
| 4x4 | 0.67 |
| 4x3 | 0.72 |
| 3x3 | 0.77 |
| 3x2 | 0.78 |
| 2x2 | 0.79 |
| 2x1 | 0.79 |
| 4x4 at 20 % | 0.20 (equal to the offered load) |
| 4x4, corner 0 off | 0.63 |
| 4x4, edge 1 off | 0.56 |

Per active node, smaller networks saturate later because their paths are shorter. Per node
of the full 16-node fabric, they deliver less: for example, the 2x2 delivers 4 × 0.79 / 16 =
0.20. Published results for this kind of network report that a 4x4 mesh with 2 VCs and depth
4 meets 0.59 packets/cycle/node at 80 % load. The testbench checks that this design reaches
at least that; it measures 0.67.

Those results list single-corner-off 4x4 networks only at depth 8 and above. This design
already gives 0.63 for corner 0 off at depth 4. Its allocator and single-flit packets
probably differ from the measured implementation, so the absolute numbers should not be
compared closely.

## Convolutional encoders (`conv_encoder`)

Each encoder is a rate 1/`N_OUT`, constraint length `K` feed-forward encoder:

* A `K-1` bit history register holds the previous input bits.
* Output `j` is the parity of `{in_bit, history}` masked by generator `Gj`, written in octal.
  The most significant tap of the generator is the current input bit.
* One coded word appears on `out_bits` with `out_valid`, one cycle after each `in_valid`.
* `clear` starts a new frame from the zero state.

The top holds two instances with the published standards' codes:

* **WiFi** (IEEE 802.11): K = 7, generators 133 and 171.
* **3G** (WCDMA, rate 1/3): K = 9, generators 557, 663 and 711.

In a real device only one of them occupies the reconfigurable region at a time.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | mesh size, at most 4x4 |
| `NUM_VC` | 2 | virtual channels, 1 to 8 |
| `BUF_DEPTH` | 4 | flits per VC input queue (4 to 64 are meaningful) |
| `FC` | `FC_CREDIT` | `FC_CREDIT` or `FC_PEEK` |

The package's `COORD_W`, `VC_W` and `FLIT_DATA_W` fix the flit format.

## Where this RTL departs from the reference architecture

* **Output stage.** The router core the design is based on has output-port FIFOs. Here each
  output is a single register plus per-VC credit counters.
* **Routing tables.** The reference keeps routing tables in LUTs. Here the route is computed
  from coordinates; the function is the same.
* **Single-flit packets.** Multi-flit packets and wormhole switching are not modelled.
* **Vertical detour.** The rule for a blocked Y move (sideways step plus `detour` bit) is
  this design's own.
* **Connectivity switches** isolate a switched-off router. They do not wire its neighbours
  straight through to each other.
* **No partial reconfiguration.** The bitstream loading itself is not RTL: no ICAP,
  SelectMAP, JTAG or serial configuration port, and no reconfiguration controller.
  Reconfiguration appears only as a router's active bit going low and high again.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv tb/tb_connect_mesh.sv \
          --top-module tb_connect_mesh -Mdir obj_mesh
./obj_mesh/Vtb_connect_mesh
```

| testbench | what it covers |
|---|---|
| `tb_reconf_noc_top` | whole design at default parameters: all regular maps, two irregular maps, throughput, no loss, encoders |
| `tb_connect_mesh` | credit and peek meshes side by side, scoreboard over 19 maps, latency |
| `tb_connect_router` | routing per port, credit protocol, 2-cycle latency, detour, switch-off |
| `tb_route_unit` | exhaustive routing decisions, and hop-by-hop walks through maps with holes |
| `tb_flit_fifo`, `tb_out_flow_ctrl`, `tb_link_switch`, `tb_network_map`, `tb_packet_gen`, `tb_credit_sink`, `tb_conv_encoder` | the individual blocks |

Each testbench runs in a few seconds at most. All RTL is synthesizable SystemVerilog-2017.
The only sizeable memories are the router input queues, which are plain arrays.
