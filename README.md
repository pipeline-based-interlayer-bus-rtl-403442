# Pipelined interlayer bus for 3D networks-on-chip

In a 3D chip built from stacked dies, each layer has its own 2D mesh
network, and the layers are joined by vertical wires (through-silicon vias,
TSVs). A common way to use those wires is one shared bus per mesh position.
A central arbiter grants it to one layer at a time. That is simple, but only
one transfer can be under way, and a request pays for a round trip to the
arbiter before it can start.

This design cuts the vertical bus into segments, one between each pair of
adjacent layers. At every layer sits a small **transfer stage**. Each segment
is a pair of point-to-point links, one going up and one going down, so every
segment can carry a datagram in each direction in every cycle. There is no
global grant. A layer drops a datagram into its queue, and its transfer stage
merges it into the passing traffic with a local two-way round robin. Every
stage looks at each datagram's destination layer: it either passes the
datagram on or hands it to its own layer. Flow control is by credits, one
segment at a time. A layer can also run from its own clock. Its interface
then crosses between that clock and the bus clock with Gray-pointer
dual-clock FIFOs.

The RTL describes one vertical pillar: four layers by default, as in a 3×3×4
stacked mesh, where each of the nine (x,y) positions would have one such
pillar. The mesh routers, the cores and the memories are outside this RTL.
The pillar's ports are the places where a router's vertical port would
connect.

```
            layer 3 router            layer 2 router     ...     layer 0 router
                 |                         |                         |
           nis_interface             nis_interface             nis_interface
          (inj q | ej q)            (inj q | ej q)            (inj q | ej q)
                 |                         |                         |
   open -- transfer_stage 3 ==seg== transfer_stage 2 ==seg== ... transfer_stage 0 -- open
                  (each "==seg==" is an up link, a down link and a credit wire for each)
```

## Datagrams

A datagram is one bus word, `nis_pkg::datagram_t`, 38 bits wide:

| field   | bits | meaning                                                     |
|---------|------|-------------------------------------------------------------|
| `layer` | 2    | destination layer. Every transfer stage reads it.           |
| `core`  | 4    | destination core inside that layer. The bus passes it through for the layer's router. |
| `data`  | 32   | payload, one 32-bit flit                                     |

Every datagram carries its own header, so the stages need no packet state.
Datagrams from one source layer to one destination layer arrive in the order
they were sent. Datagrams from different sources may interleave at a
destination. A multi-flit message therefore has to carry enough in its
payload or `core` field for the receiver to reassemble it, or the layer has
to send it as separate datagrams.

## The transfer stage

`transfer_stage` has two identical pipelines, `ts_pipeline`. The **up**
pipeline receives from the layer below. The **down** pipeline receives from
the layer above. Each pipeline is a three-entry receive buffer. The datagram
at its head does one of two things:

* **forward**: if its `layer` is not this stage's `LAYER_ID`, it asks the
  output port on the far side for the segment;
* **eject**: if its `layer` is this stage's `LAYER_ID`, it asks to be written
  into the layer's ejection queue. Both pipelines can want this in the same
  cycle. A round-robin arbiter (`rr_arbiter`) lets one through, and the other
  waits.

Datagrams injected by the layer come out of the interface's injection queue.
They are sorted by destination into two small injection FIFOs: **up** for
`layer > LAYER_ID` and **down** for the rest. Each output segment
(`ts_output_port`) then has two requesters: the pipeline passing traffic
through, and the injection FIFO for that direction. By default a round robin
picks between them, so under full load from both the segment alternates
strictly. The `PRIO` parameter can instead give fixed priority to local
traffic (`PRIO_INJECT`) or to passing traffic (`PRIO_FORWARD`).

A datagram whose `layer` equals the injecting stage's own layer belongs to
the layer's router, not to the bus. An assertion flags it.

## Credits and the three registers

This is the part that fixes the bus's throughput.

Each output port starts with `CREDITS = 3` credits, one for each entry of the
receive buffer on the other end of the segment. Sending a datagram uses one
credit. The receiving pipeline returns a credit for each entry it frees, as a
one-cycle pulse on the credit wire of that segment. The receiving buffer can
never overflow, and no datagram is ever dropped or retried.

The three receive registers are the only storage on a segment. The output
port has no register of its own. It drives the granted datagram straight
onto the vertical link, and the receiver writes it at the end of that cycle.
The credit loop takes two cycles:

1. cycle 0: the sender grants and drives a datagram and spends a credit; the
   receiver writes it at the edge that ends the cycle;
2. cycle 1: the datagram is at the head and is popped (forwarded or
   ejected); the credit pulse is registered at the edge;
3. in cycle 2 the sender sees the pulse and can use it in that same cycle.

Three buffer entries cover this loop with one to spare, so a segment with a
free-running receiver carries one datagram per cycle in each direction. The
tests measure this. If the receiver stalls (its ejection queue is full, or its own next
segment has no credit), the stall moves back one segment at a time, as the
credits stop coming back.

## Clock domains

The transfer stages and segments all run on `bus_clk`. `nis_interface` holds
the two host-port queues of a layer:

* `ASYNC = 1` (the default): the queues are `bisync_fifo` instances. Each has
  a write pointer and a read pointer, kept in binary and Gray code. Each Gray
  pointer crosses to the other clock through two flip-flops. Only one bit
  changes between neighbouring Gray codes, so a pointer sampled while it
  changes reads as either the old value or the new one, never a wrong one,
  and no handshake is needed. A datagram becomes visible on the other side
  2 to 3 cycles of the reading clock after it was written. The full and
  empty flags are conservative.

  Each layer's interface in this build can also be switched to synchronous
  operation while running, with `layer_sync[i]`. This is allowed only for a
  layer whose `layer_clk` is `bus_clk` itself. In this mode the queues form
  their flags straight from the other side's pointer register. Their latency
  is then that of a single-clock FIFO, and the synchronizer delay (up to three
  cycles per queue) is gone. The mode may change at any time. In sync mode
  one side can get ahead of the synchronized copy of the other side's pointer.
  So for three cycles after `layer_sync` falls, each side of each queue
  reports itself full or empty, until its synchronizers have caught up.
* `ASYNC = 0`: the queues are plain `sync_fifo` instances on `bus_clk`, and
  `layer_clk` is ignored.

The segments between stages are always synchronous to `bus_clk`. A
per-segment clock crossing is not built.

## Timing

On an idle bus built with `ASYNC = 0`, a datagram from layer *s* to layer *d*
is delivered `|d−s| + 2` clock edges after the edge that takes `inj_valid`
(that edge writes the injection queue). The edges after it are:

* one to move the datagram into the direction FIFO;
* one for each segment crossed (into the next receive buffer);
* one to write the ejection queue, after which `ej_valid` is high.

The same holds for the `ASYNC = 1` build with `layer_sync` high. Otherwise
each queue adds the synchronizer delay of its reading clock. Throughput is one datagram per cycle per segment and direction, and
all segments work at the same time. For example, streams 0→1, 1→0, 2→3 and
3→2 each run at full rate together.

## Ports of `nis_bus`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `bus_clk`, `bus_rst_n` | in | 1 | bus clock, asynchronous active-low reset |
| `layer_clk`, `layer_rst_n` | in | `LAYERS` | per-layer clock and reset (used when `ASYNC = 1`) |
| `layer_sync` | in | `LAYERS` | per layer: 1 = interface in synchronous mode, only if that `layer_clk` is `bus_clk` (used when `ASYNC = 1`) |
| `inj_valid`, `inj_ready` | in, out | `LAYERS` | send handshake, layer clock domain |
| `inj_dg` | in | `datagram_t [LAYERS]` | datagram to send; `layer` must name another layer |
| `ej_valid`, `ej_ready` | out, in | `LAYERS` | receive handshake, layer clock domain |
| `ej_dg` | out | `datagram_t [LAYERS]` | received datagram |

Apply all resets together. Reset empties every queue and restores all
credits.

| parameter | default | meaning |
|-----------|---------|---------|
| `LAYERS` | 4 | layers in the stack (at most 4 with the 2-bit `layer` field) |
| `ASYNC` | 1 | dual-clock interfaces (1) or single-clock (0) |
| `FIFO_ADDR_W` | 3 | interface queue depth `2**FIFO_ADDR_W` |
| `INJ_DEPTH` | 2 | depth of each per-direction injection FIFO |
| `PRIO` | `PRIO_ROUND_ROBIN` | output arbitration between passing and local data |

## Where this follows the published scheme and where it chooses

These follow the published NIS ("novel interlayer structure") design:

* one transfer stage per layer;
* two pipelines of three registers;
* forward-or-eject decided by the destination layer address;
* round-robin arbitration both for ejection and for merging local with
  passing data;
* splitting local data into an up FIFO and a down FIFO;
* credit flow control on segments;
* optional dual-clock interface queues with Gray-coded pointers and two
  synchronizers;
* interfaces that can be set to synchronous or asynchronous operation;
* four layers and a 32-bit data width.

These are this design's own choices, because the scheme leaves them open:

* the datagram format: header and payload side by side in one word;
* that the three registers form the credit-tracked receive buffer;
* the credit encoding (one pulse per freed entry);
* the depth of the queues: 8 in the interface, 2 per direction for
  injection;
* the valid/ready handshake toward the router;
* a single bus clock for all stages;
* `ASYNC` as a build-time parameter, so that a bus whose layers all share one
  clock carries no synchronizers. The run-time mode switch `layer_sync` exists
  only in the bi-synchronous build, and works by bypassing the synchronizers;
* the reset behaviour.

## Not included

* **The layer routers** (5-port mesh router plus the bus port, 2 virtual
  channels of 5 flits, XY routing, wormhole switching). Also the processors,
  the DDR2 memories and the network interfaces that make up the evaluated
  3×3×4 system. The bus is built to be dropped in where a router's vertical
  port would go. The network-level latency comparisons need that whole
  system.
* **Asynchronous segments** between transfer stages. Only the layer-to-bus
  crossing is built.
* **Area and power.** Those figures were for a 90 nm library, and nothing
  here reproduces them.

## Files

`rtl/`

* `nis_pkg.sv`: datagram type, widths, pipeline depth, priority enum
* `nis_bus.sv`: the pillar, the top level
* `transfer_stage.sv`: the per-layer stage
* `ts_pipeline.sv`: one direction's receive buffer and its forward/eject decision
* `ts_output_port.sv`: the output segment's arbitration and credit counter
* `rr_arbiter.sv`: round-robin arbiter
* `nis_interface.sv`: the host-port queues of a layer
* `bisync_fifo.sv`: dual-clock FIFO
* `sync_fifo.sv`: single-clock FIFO

`tb/`: one self-checking testbench per module (`tb_<module>.sv`;
`tb_nis_interface` runs `nis_interface_env.sv` for both clocking builds), plus:

* `tb_nis_bus.sv`: end to end at the default parameters. Four phases:
  uniform, local, hot spot and saturation. Layers 1 to 3 have their own
  clocks. Layer 0 runs on the bus clock and switches between synchronous and
  asynchronous mode at random. Receivers push back at random, and the test
  checks that every mechanism above occurred.
* `tb_nis_bus_sync.sv`: exact latency for all twelve source/destination
  pairs, and full-rate streams. A second bus, built bi-synchronous but run in
  synchronous mode on one clock, must match the first cycle for cycle.
* `tb_nis_bus_load.sv`: average latency for uniform and local traffic at
  offered loads of 0.1 to 0.4 datagrams per layer per cycle.

Each testbench prints `TB_RESULT checks=N failures=M` and ends by itself.

## Simulating

Verilator 5 with timing support is enough. From the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/nis_pkg.sv tb/tb_nis_bus.sv \
          --top tb_nis_bus -o sim && ./obj_dir/sim
```

Put another testbench's name in both places to run it. `-y` finds the
modules it uses, and the package goes first on the command line. Verilator's
simulation has only two states, so every register that is read is reset. The
testbenches draw random data with `$urandom`.
