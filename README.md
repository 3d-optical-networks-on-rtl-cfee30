# 3D electronic-controlled optical network-on-chip

A network-on-chip for a multiprocessor system-on-chip that moves payload as
light and decides where the light goes with ordinary CMOS logic. The chip has
two stacked device layers joined by through-silicon vias (TSVs):

* **Optical layer** – one *Cygnus* optical switching fabric per node, joined
  to its neighbours by waveguides. Payload crosses this layer
  circuit-switched: a whole path from source to destination is reserved
  first. The payload then streams through it without any buffering.
* **Electronic layer** – one *electronic control unit* (ECU) per node, joined
  to its neighbours by 32-bit metallic links, plus the functional cores. The
  control units form a small packet-switched network. Short *setup* and
  *tail* packets travel in it with XY routing. On the way they power the
  microresonators (MRs) of the fabrics above them on and off, which builds
  and tears down the optical path.

The default configuration is an 8x8 mesh running at 1 GHz. Each optical link
carries 32 Gbit/s.

## How a transfer works

1. The source core asks its network interface (`onoc_nic`) to send
   `req_len` 32-bit words to node (`req_dst_x`, `req_dst_y`).
2. The interface sends a **setup** packet to its local control unit.
3. Each control unit on the XY route forwards the setup through output port
   *o*. It also reserves optical output *o* for the input port *i* the setup
   came from, and powers the MR that couples optical input *i* to output *o*.
   Straight east–west and north–south passage needs no MR. A turn, an
   injection or an ejection needs exactly one. So a path never powers more
   than three MRs: one at the source, one at the turn and one at the
   destination.
4. At the destination the setup reserves the ejection port and is handed to
   the core. The control unit then starts the **acknowledge**. The
   acknowledge travels back hop by hop, one cycle per hop. Each unit steers
   it to the input that owns the reserved output.
5. On receiving the acknowledge, the source interface streams the payload
   into the fabric's injection port, one word per cycle (32 Gbit/s at
   1 GHz). Light crosses every fabric on the path in the same cycle and
   appears at the destination's ejection port.
6. A **tail** packet is sent together with the last word. It follows the same
   XY route and releases each reservation, so the next path can use the
   output.

A setup that finds its optical output already reserved waits at the head of
the input buffer until a tail frees that output. This cannot deadlock, for
two reasons:

* Paths reserve links in XY order.
* An upstream output stays reserved until its tail passes. So at most one
  setup can be waiting on any link.

## Modules

| File | Kind | What it is |
|---|---|---|
| `rtl/onoc_pkg.sv` | package | port numbering, packet and light types, MR numbering, XY routing |
| `rtl/optical_noc_3d.sv` | RTL, top | the mesh: routers, interfaces and all links |
| `rtl/cygnus_router.sv` | RTL | one Cygnus router = control unit + fabric |
| `rtl/ecu.sv` | RTL | electronic control unit: control-packet router and fabric configuration |
| `rtl/ctrl_fifo.sv` | RTL | 2-entry input buffer of each control port |
| `rtl/onoc_nic.sv` | RTL | core-side protocol engine, at the electrical side of the EO/OE converters |
| `rtl/cygnus_fabric.sv` | behavioural model | 5x5 optical switching fabric with 16 MRs |
| `rtl/mr_switch.sv` | behavioural model | one microresonator 1x2 switching element |

Router ports are numbered 0 = local (injection/ejection), 1 = north,
2 = south, 3 = west, 4 = east. Coordinates: x grows east and y grows north.
Node *n* is `y*MESH_X + x`.

### The optical fabric and its microresonators

The fabric has one MR for each input/output pair that is neither a U-turn
nor a straight pass: 5x4 = 20 pairs, minus the 4 straight ones, gives
16 MRs. `onoc_pkg::mr_index(i,o)` numbers them input-major, and
`mr_on[15:0]` of each router drives them.

Each MR element behaves like a ring next to two waveguides:

* Powered on, light on its input leaves on the drop port.
* Powered off, the light continues to the through port.

The model chains, for every input waveguide, the MRs towards each reachable
output. What is left at the end of an input waveguide goes to the opposite
side, or into a terminator for the injection input. Every output waveguide
collects the drops aimed at it. Only the element count, the passive straight
routing and the terminator come from the Cygnus router. The physical placement
and the waveguide crossings are not modelled.

Light is an `opt_t` word per clock cycle: an `on` flag plus 32 data bits. It
stands for the serial 32 Gbit/s stream on a single waveguide. The fabric
model has no delay and no state.

**Combinational cycles.** Light has zero delay, so a mesh of these fabrics
contains structural combinational cycles. One example is light turning
east→north, north→west, west→south and south→east in four neighbouring
routers. Every such cycle passes a Y-to-X turn MR, which XY routing never
powers, so no cycle is ever closed. Verilator reports `UNOPTFLAT`, and a
synthesis loop check lists the cycles. They are kept on purpose: a register
on each optical hop would give light a whole clock cycle of delay it does not
have.

### Electronic control unit

* **Input buffers:** each input port has a 2-entry FIFO (`ctrl_fifo`). Its
  `ready` comes from registered state only.
* **Arbitration:** each output has a round-robin arbiter. A tail may always
  go, and it releases the output. A setup may go only while the optical
  output is free. Both need the downstream buffer to be ready.
* **Timing:** without contention, a control packet advances one router per
  cycle.
* **Reservation state:** one valid bit and one owner port per output.
  `resv_valid`/`resv_src` expose it.
* **Assertions:** a tail may only release an output its own path reserved,
  and an acknowledge may only arrive on a reserved output.

Control packet, one 32-bit flit:

| bits | field |
|---|---|
| 31:30 | type (1 = setup, 2 = tail) |
| 29:26 | source x |
| 25:22 | source y |
| 21:18 | destination x |
| 17:14 | destination y |
| 13:0 | reserved (zero) |

The 4-bit coordinates allow meshes up to 16x16.

### Network interface

`onoc_nic` has five states: idle → send setup → wait for the acknowledge →
stream the payload → (tail, if the control unit could not take it with the
last word).

* The core supplies `tx_data` and sees `tx_take` for every word consumed.
* `tx_done` pulses when the tail has been accepted.
* On the receive side, `rx_setup_valid`/`rx_src_*` announce an incoming
  path, `rx_valid`/`rx_data` carry the words, and `rx_tail_valid`/`rx_words`
  report the end of the packet and the number of words received.

## Timing of one transfer

Counted from the edge where the request is accepted, over *H* router-to-router
hops, with no contention:

* The first payload word leaves **2H + 4** cycles later. That is 1 cycle into
  the source router, H hops out, 1 to reserve the ejection port, H hops back
  for the acknowledge, and 1 to start sending.
* The payload then takes one cycle per word. A 2048-byte packet (512 words)
  takes 512 cycles.
* The tail frees the links behind the last word, one hop per cycle.

## Measured behaviour under uniform traffic

`tb_onoc_uniform_traffic` runs the 8x8 mesh with every core generating
packets independently: exponentially distributed intervals, destinations
uniform over the other 63 nodes. The injection rate *r* is the offered load
as a fraction of one core's 32 Gbit/s link, so the offered network load is
*r* × 2048 Gbit/s. Each point is reset, warmed up for 10 000 cycles and then
measured over 15 000 cycles. End-to-end (ETE) delay runs from the packet's
generation, queueing included, to its last word's arrival.

| packet | r = 0.1 | r = 0.3 | r = 0.5 |
|---|---|---|---|
| 512 B  | 207 Gbit/s, 0.21 µs | 411 Gbit/s, 4.1 µs | 430 Gbit/s, 9.6 µs |
| 2048 B | 210 Gbit/s, 0.68 µs | 436 Gbit/s, 5.0 µs | 476 Gbit/s, 8.2 µs |
| 4096 B | 201 Gbit/s, 1.4 µs | 399 Gbit/s, 5.2 µs | 515 Gbit/s, 7.8 µs |

Below saturation the network delivers what is offered. Above about
*r* = 0.25 it saturates between roughly 430 and 515 Gbit/s, and larger
packets saturate higher because setup overhead is amortised. The numbers come
from this testbench's random source and shift a little with the seed. Delays past saturation
also grow with the length of the measurement window, because the source
queues are unbounded.

## Where this design departs from, or adds to, the architecture

* **Acknowledge path.** The architecture sends the acknowledge bit back
  along the optical path. It also counts at most three powered MRs per path,
  and that holds only if the fabric carries light forwards alone. This
  design keeps the three-MR budget and returns the acknowledge on a 1-bit
  electrical wire per link, along the reserved path in reverse.
* **Element shapes.** The fabric is built from two kinds of 1x2 element:
  one with two parallel waveguides and one with two crossing waveguides.
  They switch the same way, so `mr_switch` models both.
* **Optical link width.** Each optical link is a single serial waveguide per
  direction. Here it is a 32-bit word per 1 GHz cycle, which carries the same
  32 Gbit/s.
* **Contention.** A setup that finds its output reserved waits. The
  architecture does not say what happens in that case.
* **Choices of this design**, not taken from the architecture:
  * buffer depth and round-robin arbitration;
  * the packet layout and the core-side handshake;
  * synchronous active-low reset;
  * tie-offs at the mesh edge.
* **Not modelled:**
  * the EO/OE converters (analog; at this level they pass words unchanged);
  * TSVs and waveguides (plain wires here);
  * the functional cores (their side of each interface is a top-level port);
  * clock tree, power ring and the 45 nm physical implementation;
  * power and energy;
  * the 2D electronic mesh the architecture is compared against.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each one has a watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_optical_noc_3d -y rtl -y tb +libext+.sv -Irtl \
  rtl/onoc_pkg.sv tb/tb_optical_noc_3d.sv -o sim
./obj_dir/sim
```

The same command works for the other testbenches; change the top module and
the testbench file.

| Testbench | What it checks |
|---|---|
| `tb_mr_switch` | on/off behaviour of one MR element |
| `tb_cygnus_fabric` | all 20 single connections, MR count per connection, terminator, simultaneous paths |
| `tb_ecu` | XY output port, one-cycle hop, reservation and MR drive, a setup held by a reserved output, tail release, back-pressure, acknowledge start and forwarding |
| `tb_onoc_nic` | setup/ack/payload/tail order, one word per cycle, tail with the last word or later, receive reporting |
| `tb_cygnus_router` | light follows the reserved paths through a router and goes dark after release |
| `tb_optical_noc_3d` | full 8x8 mesh at default parameters: the 2H+4 setup time and the word-per-cycle rate on the longest path, then uniform random traffic (512 B–4096 B payloads, exponential gaps) with every word checked, every packet delivered once, the three-MR-per-path budget every cycle, and a count of each mechanism (waiting setup, straight passage, MR turn, ejection, acknowledge, tail release) |
| `tb_onoc_uniform_traffic` | throughput and end-to-end delay over injection rates 0.1/0.3/0.5 and packet sizes 512/2048/4096 B on the 8x8 mesh (about 25 s) |

The 8x8 end-to-end run takes a few seconds.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` (top) | 8, 8 | mesh size |
| `FIFO_DEPTH` (top, router, ECU) | 2 | control input buffer entries |
| `onoc_pkg::LINK_W` | 32 | control link width |
| `onoc_pkg::OPT_W` | 32 | optical bits per clock cycle (32 Gbit/s at 1 GHz) |
| `onoc_pkg::COORD_W` | 4 | coordinate width in a control packet |
| `onoc_pkg::LEN_W` | 16 | payload length field, in words |
