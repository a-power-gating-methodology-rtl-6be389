# APNEA: power gating of network-on-chip input buffers

In a virtual-channel wormhole router the input buffers account for most of the
leakage, yet they sit empty most of the time. This design switches individual
buffers off and on at run time. The decision is taken at the *upstream* end of
every link, where the traffic that is about to arrive can be seen. The
switching happens at the *downstream* end, where the buffers are. Three ideas
make it work without costing noticeable performance:

* **Flow balance.** Each output port compares the packets that will soon need
  a virtual channel with those already holding one. Packets in buffer write
  (BW) and VC allocation (VA) are the incoming traffic; packets in switch
  allocation (SA) are the active traffic. The number of powered buffers
  follows the difference between them, one buffer per cycle at most.
* **Late binding.** The upstream router allocates *virtual* channels. Which
  *physical* buffer stores a VC's flits is decided only when its first flit
  arrives. A remapper then packs the traffic into the lowest-numbered powered
  buffers, so the high-numbered ones can stay off for long stretches.
* **Sliding window.** The set of powered buffers in an input port grows and
  shrinks with the traffic. One buffer per port is never switched off.

The RTL is a complete 2D-mesh network (8x8 tiles by default). Each tile has a
network interface (NIC), a five-port router and the NIC's ejection port.
Every channel is gated, whether NIC to router, router to router or router to
NIC. On each one, the sending side decides and the receiving side actuates.

## Structure

```
apnea_noc                          MESH_X x MESH_Y tiles, links between them
 └─ per tile
    ├─ apnea_nic                   message queues per VNET
    │   └─ apnea_outport (NIC mode)
    │       ├─ apnea_local_nic ×3
    │       └─ apnea_global_decision
    ├─ apnea_link                  NIC -> router Local input
    ├─ apnea_router                5 ports: Local, North, East, South, West
    │   ├─ apnea_inport ×5         remapper, actuator, 6 × apnea_vc_buffer
    │   └─ apnea_outport ×5 (router mode, apnea_local_r2r ×3, global decision)
    ├─ apnea_link ×(1..5)          router outputs -> neighbours / ejection
    └─ apnea_inport                ejection buffers, read by the core side
```

`apnea_pkg` holds the constants and types: 3 virtual networks (VNETs), 2 VCs
per VNET (6 VCs per link), 32-bit flits, the flit struct, the command struct
and the state enums.

Default parameters follow the evaluated network: an 8x8 mesh, 3 VNETs × 2
VCs, 4-flit buffers, one-cycle links and a wake-up time T_ON of 2 cycles.
The following defaults are choices of this design:

* T_OFF (sleep time) is 1 cycle.
* The NIC has 4 messages of queue per VNET.

## The decision, cycle by cycle (`apnea_outport`)

Every cycle the output port counts, for each VNET, using the registered state:

| quantity | router mode | NIC mode |
|---|---|---|
| R_BW | head flits in their first cycle at a source | 0 (a NIC has no BW stage) |
| R_VA | heads waiting for a VC, plus whole packets queued behind a source | the same: messages not yet on a VC |
| R_SA | sources holding a VC | the same (packets in link allocation) |
| usable | powered VCs that are idle, or whose last packet has already sent its tail (non-atomic VC allocation, NAVCA) | powered idle VCs only |

The **local rule** (`apnea_local_r2r`) for a router:

* With a usable VC and R_BW+R_VA ≤ R_SA, the VNET votes DOWN.
* With no usable VC and R_BW+R_VA > R_SA, it votes UP.
* Otherwise it votes KEEP.

The NIC rule (`apnea_local_nic`) differs in three ways:

* It votes DOWN when R_VA < R_SA, or when the VNET has no traffic at all.
* It votes UP when R_VA ≥ R_SA and some traffic exists.
* Otherwise it votes KEEP.

The **global rule** (`apnea_global_decision`) takes the votes of all VNETs.
UP wins: the lowest VNET voting UP that still has a powered-off VC switches on
its lowest such VC. Without any UP, the lowest VNET voting DOWN that owns an
idle, fully woken VC switches off its highest-numbered idle VC. At most one
command leaves per cycle.

The rules have two consequences worth knowing:

* **Serialization.** When incoming equals active traffic, no new buffer is
  woken, and a packet may wait for a busy VC to send its tail even though
  another buffer could have been woken. This is deliberate: it keeps the
  window small. It shows up as VA stalls near saturation.
* **Waking VCs count as usable.** A VC that has been commanded on but is
  still waking already counts as usable. Without this, one wake-up would be
  requested again in every cycle of T_ON.

A VC's upstream power view changes at the decision edge. Three timing rules
follow from it:

* **A woken VC** becomes allocatable T_ON cycles after the decision. With this
  pipeline (VA, SA, output register, link), a flit allocated in that cycle
  reaches the downstream buffer in the very cycle the buffer turns ON. The
  pipeline thus hides the rest of the wake-up. An assertion in the remapper
  checks that no flit ever arrives without a powered buffer.
* **The first VC after all were off** is switched on locally. No command is
  sent, because the downstream port always keeps one buffer on. The VC is
  usable at once, so a lone packet after a quiet period pays no wake-up.
* **The last VC** is switched off with a command all the same. This releases
  its binding downstream; the downstream port ignores the power-off part.

If VA grants a VC in the same cycle that a DOWN targets, the grant wins and
the DOWN is dropped. The VC is no longer idle.

VA makes one grant per cycle and SA/LA sends one flit per cycle. Both
arbitrate round robin over the sources. Credits are BUF_DEPTH per VC. A VC
whose tail has left returns to idle when all of its credits are back.

## The router (`apnea_router`)

The router is a four-stage wormhole pipeline: buffer write with route
computation (BW/RC), VC allocation (VA), switch allocation (SA) and switch
traversal (ST). A link cycle follows. Routing is XY: a packet first corrects
its column, then its row. A head flit carries its destination in
`data[3:0]` (x) and `data[7:4]` (y). Body flits follow their head.

Each input port is an `apnea_inport`. Each output port is an `apnea_outport`
whose sources are the five input ports. Two things join them:

* **Streams.** Each input port offers one packet per output port: the one in
  its lowest-numbered buffer whose front is a head routed there. The stream
  stays locked to that buffer until the tail has crossed the switch. Other
  heads waiting in the same port for the same output count as incoming (VA)
  traffic in that output's decision.
* **Crossbar input stage.** An input port can send only one flit per cycle.
  Each output port reports which sources could use the switch. A round-robin
  pointer per input port then picks one of those output ports, and only that
  one may grant the flit. A lost bid is reported as a crossbar conflict.

The router's coordinates are inputs (`my_x`, `my_y`), so one module serves
every tile. In an idle network a message is readable at its destination
6 + 5·R cycles after it is offered, where R is the number of routers on its
path:

* 6 cycles through the NIC: queue write, wake decision, VA, link
  allocation, link, buffer write;
* 5 cycles per router: BW/RC, VA, SA, ST, link.

## The downstream port (`apnea_inport`)

An arriving flit and an arriving command are handled in the same cycle.

* **Remapper** (`apnea_remapper`). A flit on an unbound VC binds that VC to
  the lowest-numbered buffer that is ON and unbound. The binding lasts across
  packets, so NAVCA packets queue behind their predecessor in the same
  buffer. It ends when ACT_OFF names the VC; the upstream sends that only
  when the VC is idle, so the buffer is empty by then. The remapper also
  reports which VC each buffer serves, so that each pop returns its credit to
  the right VC.
* **Actuator** (`apnea_pg_actuator`). Each buffer moves through
  OFF → OFF_TO_ON (T_ON cycles) → ON → ON_TO_OFF (T_OFF cycles) → OFF.
  After reset buffer 0 is ON and the rest are OFF.
  * ACT_ON wakes the lowest OFF buffer. If the only candidates are still
    going to sleep, the lowest of those is woken again.
  * ACT_OFF first aborts the lowest waking buffer. Failing that, it puts to
    sleep the lowest ON buffer that is not bound. It is ignored when only one
    buffer is ON or waking.
* **Buffers** (`apnea_vc_buffer`). Each buffer is a 4-flit FIFO that holds
  data only while ON; gating it clears it. The rest of the router reads each
  buffer through its own valid/flit/pop port.

`apnea_link` delays flits, commands and credits by LATENCY register stages.
The default is one stage. Because commands and flits travel in step, a
power-off never overtakes a flit sent before it.

## Interfaces

* Flit (`flit_t`, 41 bits): `head`, `tail`, `vnet[1:0]`, `vc[2:0]` (the
  upstream VC) and `data[31:0]`.
* Command (`pg_cmd_t`): `action` (NONE/ON/OFF) and `vc`.
* Credits: one bit per VC per cycle.
* `apnea_noc` ports, indexed by tile n = y·MESH_X + x:
  * NIC message injection, per VNET: valid, length in flits, payload word,
    ready. The payload's low byte is the destination. Flit *i* of a message
    carries payload + *i*.
  * Ejection buffer reads, indexed `[tile][buffer]`: valid, flit, pop.
  * Power states of every router input buffer and every ejection buffer,
    for energy accounting.
  * One-cycle event pulses per tile, one bit per router port: VA stall,
    local wake-up, NAVCA reuse, wake, sleep, aborted wake-up, ignored last
    sleep, new binding, crossbar conflict. There are also NIC VA stalls, NIC
    local wake-ups and ejection wake-ups.

All modules use a synchronous, active-low reset.

## How far to trust it, and where it departs from the method as published

Self-checking testbenches in `tb/` cover every module. Each also fails when
its module is broken on purpose in a way that matters.

`tb_apnea_noc` runs a 3x3 mesh through bursts, quiet periods and low load,
with random destinations. Messages are 1 flit on VNETs 0 and 1 and 3 flits on
VNET 2, and the ejection side stalls at random. It checks:

* every flit reaches the tile its head names;
* messages stay whole and in order in one buffer;
* every message arrives exactly once;
* lone messages take exactly 6 + 5·R cycles;
* every mechanism above occurs.

The 8x8 default was not simulated: its simulator build is too slow. The
3x3 mesh is the largest size run, and it uses the same tile logic.

Two more testbenches cover smaller pieces:

* `tb_apnea_router` surrounds one router with gated channels on all five
  sides.
* `tb_apnea_channels` runs one NIC channel and one router channel at
  default parameters for about 40 000 cycles. It uses the `tb_chan_pair`
  harness, where a lone packet takes 5 cycles.

Several choices are this design's own, where the method leaves room:

* **Scope.** Cores, caches and the coherence protocol are not included; the
  mesh brings out message injection and ejection reads instead. The
  ejection channel (router to NIC) is gated like a router-to-router channel.
* **Router internals.** The streams and the input-first switch arbitration
  are this design's own, as is the destination encoding in the head flit.
* **NIC queues.** Each NIC VNET queue sends one message at a time, so it
  holds at most one VC. Queue depth and message format are also this
  design's choice.
* **Upstream view of waking VCs.** Waking VCs count as usable, as described
  above.
* **VA versus DOWN.** A same-cycle VA grant beats a DOWN on the same VC.
* **Actuator targets.** Power-off only picks unbound (empty) buffers. An
  aborted wake-up goes through ON_TO_OFF. A power-on may re-wake a buffer
  that is still going to sleep.
* **Arbitration and VC choice.** The arbiters are round robin, and VA takes
  the lowest eligible VC.

The energy numbers of the method come from a power model and are not
reproduced. The testbenches report time per power state instead.
`tb_apnea_workload` runs the two synthetic packet mixes on four copies of
the channel pair in parallel: T_ON = 1, 2, 4 with 4-flit buffers, and T_ON = 2 with 8-flit
buffers. The mixes are 1-flit packets everywhere, and 1-flit packets plus
3-flit packets on one data VNET. Each copy runs at three loads; a source
offers a new packet only after its previous one has arrived. Typical results
at T_ON = 2:

| mix, offers per source per 1000 cycles | OFF | waking | ON | going off | avg latency (cycles) |
|---|---|---|---|---|---|
| 1+3 flit, 20 | 81.6 % | 0.6 % | 17.5 % | 0.3 % | 6.5 |
| 1+3 flit, 120 | 66.7 % | 3.9 % | 27.3 % | 2.2 % | 7.1 |
| 1+3 flit, 500 | 50.6 % | 5.2 % | 41.3 % | 3.0 % | 7.6 |
| 1 flit, 500 | 52.0 % | 5.6 % | 39.2 % | 3.2 % | 6.1 |

Latency is counted from the cycle a packet is offered to the cycle its tail
can be read downstream, queueing at the source included.

Going from T_ON = 1 to T_ON = 4 adds about 1 to 1.7 cycles of average
latency, and doubling the buffer depth changes almost nothing at these loads. These are channel-level figures. The mesh testbench reports the same
state counts for the router buffers. Permutation traffic patterns
(tornado, transpose, bit complement) are not run.

## Simulating

With Verilator 5 (the testbenches use `--timing` delays):

```
verilator --binary --timing -Wno-fatal --top-module tb_apnea_noc \
  -Irtl -y rtl -y tb rtl/apnea_pkg.sv tb/tb_apnea_noc.sv
./obj_dir/Vtb_apnea_noc
```

Building the 3x3 mesh takes about two minutes. Replace `tb_apnea_noc` with
any testbench in `tb/`. Every testbench ends by
printing `TB_RESULT checks=<n> failures=<n>`. The protocol assertions
(powered target, credit use, feasible power commands) are concurrent
assertions; enable them with `--assert`. To change the configuration:

* VNET count, VCs per VNET and flit width are constants in `apnea_pkg`.
* Destination bits and port numbering are also constants in `apnea_pkg`.
* MESH_X, MESH_Y, BUF_DEPTH, T_ON, T_OFF, LINK_LAT and QDEPTH are parameters
  of `apnea_noc`. The 4x4 mesh of the real-traffic studies is
  MESH_X = MESH_Y = 4.
