# A mesh network-on-chip for programmable chips, with a configurable XY/YX routing layer

A large programmable chip can be organised as a grid of regions — blocks of
programmable fabric and hard cores such as processors, DSPs, memory and I/O
controllers — joined by a network-on-chip that is laid out in silicon before
anyone knows what the chip will run. Because the traffic pattern is only known
when the chip is configured, the network cannot be sized for one pattern. It has
to carry many. This design keeps the routers and links hard and fixed. The one
thing that stays programmable is how each source picks a path.

Every packet travels by dimension order, in one of two orders:

* **XY**: along x (east/west) to the destination column, then along y.
* **YX**: along y first, then along x.

A single bit in the packet header chooses between them. The network interface
sets that bit, and it can use one of four small circuits to do so. Each circuit
spreads load over the mesh in a different way:

| scheme | circuit | route of a packet | keeps packet order? |
|---|---|---|---|
| Toggle XY (TXY) | one flip-flop that flips on every packet | alternates XY, YX, XY, ... | no |
| Weighted toggle XY (WTXY) | 16-bit LFSR and a comparator against a threshold | XY with a configured probability | no |
| Source toggle XY (STXY) | XOR of all source and destination ID bits | XY if the parity is odd | yes |
| Weighted ordered toggle (WOT) | a table with one bit per destination | whatever the table says | yes |

Plain XY and plain YX are also available as fixed modes.

The two weighted schemes exist because traffic on a chip is rarely uniform. A few
*hotspots*, such as a memory controller or an external interface, draw most of
the traffic. Splitting their traffic evenly between XY and YX paths does not
balance link loads. The best share depends on where the hotspots sit, and it is
computed offline when the chip is configured. The ordered schemes (STXY, WOT)
send every packet of a given source–destination pair along the same path. Such
packets cannot overtake each other, so no re-order buffer is needed.

## Structure

```
noc_fpga_top            N x N mesh (N = 5), node id = y*N + x
 ├─ router   (x,y)      5 ports, 2 VCs, wormhole, one per grid point
 └─ cni      (x,y)      network interface on the router's local port
     └─ route_select    mode register picks one route-bit circuit
         ├─ txy_route   toggle flip-flop
         ├─ wtxy_route  lfsr16 + comparator
         ├─ stxy_route  parity of source and destination IDs
         └─ wot_route   N*N-bit table, one bit per destination
```

Shared types and constants live in `noc_pkg`. The helpers are `flit_fifo` (an
input buffer) and `rr_arbiter` (a round-robin arbiter).

Router `(x,y)` connects east to `(x+1,y)` and north to `(x,y+1)`. Links that
would leave the mesh are tied off. The regions behind the interfaces are not
modelled. Each interface's region side is brought out of the top as one slice of
the `tx_*` / `rx_*` port arrays, indexed by node ID.

## Packets, flits and virtual channels

A packet is one head flit followed by `BODY_FLITS` (default 3) data flits, and
the last data flit is typed *tail*. A flit is `{ftype[1:0], data[31:0]}`, where
`ftype` is head, body or tail. A head flit's `data` is a `header_t`:

| bits | field | meaning |
|---|---|---|
| 31:27 | `dst` | destination node ID |
| 26:22 | `src` | source node ID |
| 21 | `xy` | 1 = route XY, 0 = route YX |
| 20:0 | `pad` | unused by the hardware |

A link (`link_t`) carries `{valid, vc, flit}` downstream. Upstream, it returns one
ready bit per VC. A flit moves in any cycle where `valid` is high and the ready
bit of its VC is high. A sender may raise `valid` only for a VC that is ready,
and assertions check this.

**The VC is the route bit.** XY packets always travel on VC 1 and YX packets on
VC 0, and a packet never changes VC. Each VC on its own carries only one
dimension order, and dimension-order routing on a mesh cannot form a cyclic
wait. This is why mixing XY and YX packets in one network does not deadlock,
and it is the only reason the routers need two VCs.

## Router

`router` is an input-buffered wormhole router:

* **Input buffers.** Each input port has one 4-flit FIFO per VC. The ready bit
  sent upstream is just "this FIFO is not full". It comes from a register, so no
  combinational path runs back across a link.
* **Routing.** The flit at the head of an input FIFO is routed by its
  destination and by its VC (which is its dimension order). Body and tail flits
  follow the port their head took.
* **Wormhole locks.** When a head flit is granted an output port, that
  output's VC is locked to the head's input port. It stays locked until the
  tail flit passes. Meanwhile a head flit from another input that wants the
  same output VC waits. The *other* VC of the same output stays free, so an XY
  packet and a YX packet can share an output port flit by flit.
* **Switch allocation.** Each output port sends at most one flit per cycle. It
  chooses among the ten input VCs (5 ports × 2 VCs) with a round-robin arbiter.
  A candidate must have its flit routed to that output, must own the output VC
  (or be a head flit with the VC unlocked), and the downstream ready bit for
  that VC must be high.
* **Timing.** The crossbar output is combinational from the FIFO heads. A flit
  written into an input FIFO can therefore leave on the next clock, so a free
  path costs one clock per hop.

## Network interface (`cni`)

**Send side.** `tx_ready` is high while the interface is idle. When it accepts
a packet (`tx_valid && tx_ready`), it does three things in that cycle:

1. It asks `route_select` for the route bit.
2. It pulses `pkt_sent`, which advances the toggle and random-number state.
3. It latches the destination and the data words.

From the next cycle it drives the head flit, then the data flits, onto the
router's local input, on the VC equal to the route bit. It sends one flit per
cycle while that VC is ready. With no backpressure, the tail follows the head
by `BODY_FLITS` cycles.

**Receive side.** Packets on the two VCs can arrive interleaved flit by flit, so
the interface reassembles each VC separately. Each VC has a one-packet buffer.
When the tail arrives, the packet is offered on `rx_*`, together with its source
ID and the VC it came on (`rx_xy`). That VC's ready bit stays low until the
region takes the packet. When both VCs hold a packet, the interface serves them
alternately.

**Ordering.** Packets that took different paths are not re-ordered. Under TXY
and WTXY, packets of one source–destination pair can therefore arrive out of
order, and the end-to-end test does observe this. Under XY, YX, STXY and WOT
they cannot.

## The route-bit circuits in detail

**`txy_route`.** A flip-flop fed back through an inverter, enabled by
`pkt_sent`. It resets to XY.

**`wtxy_route`.** `lfsr16` is a 16-bit Fibonacci LFSR with taps 16, 14, 13 and
11 (maximal length, period 65535, never zero) and seed `0xACE1`. It advances
once per packet. The route is XY when `rnd > cxy`, and YX otherwise. Over one
full period every non-zero value appears once, so exactly `65535 − cxy` of the
65535 packets go XY.

**To get an XY share `c`, load `cxy = (1 − c)·65535`.** This is the point most
easily got backwards. The register holds the threshold *below* which packets go
YX. It does not hold the XY share itself. For example, `cxy = 21845` gives an
XY share of 2/3.

Over short runs the share wanders. Split the first 60 draws from the seed
into alternate draws, 30 each, and the XY shares come out at 0.70 and 0.77.

**`stxy_route`.** `xy = ^(src_id ^ dst_id)`: odd parity of all ten ID bits
routes XY. It is purely combinational.

**`wot_route`.** A 25-bit register indexed by destination ID, written through a
bit-wide configuration port. It resets to all-XY. IDs of 25 and above read as
XY and are ignored on write.

**`route_select`.** It holds all four circuits and a `route_mode_e` selector
(`RM_XY`, `RM_YX`, `RM_TXY`, `RM_WTXY`, `RM_STXY`, `RM_WOT`). The toggle and
the LFSR advance only while their own mode is selected. In a real programmable
chip only the chosen circuit would be configured into the soft interface. The
mode input stands in for that choice.

## Configuration

| port | scope | meaning |
|---|---|---|
| `cfg_mode` | all interfaces | routing scheme |
| `cfg_cxy` | all interfaces | WTXY threshold (one weight for the whole chip) |
| `cfg_wot_we`, `cfg_wot_node`, `cfg_wot_dest`, `cfg_wot_bit` | one interface | write one table bit: node `cfg_wot_node`, destination `cfg_wot_dest` |

Each interface has its own private WOT table. The offline algorithms that
choose `cxy` or the WOT tables are software and are not part of this RTL. Those
algorithms include balancing the busiest horizontal link against the busiest
vertical one, and a min-max search over per-pair route flips.

## Sizes and limits

| parameter | default | origin |
|---|---|---|
| mesh `N` | 5 | the grid size the schemes are evaluated on |
| node ID width `ID_W` | 5 bits | the ID width the circuits are sized for |
| RNG / comparator width | 16 bits | the width the weighted scheme is sized for |
| virtual channels | 2 | one per dimension order |
| flit data `DATA_W` | 32 | own choice |
| data flits per packet | 3 | own choice |
| input FIFO depth | 4 flits per VC | own choice |

`noc_fpga_top` has an elaboration check that stops if `N*N` does not fit in
`ID_W` bits. To build a mesh larger than 5×5, raise `noc_pkg::ID_W` as well as
`N`: a 10×10 mesh needs 7-bit IDs.

## What is not built

* **Re-order buffers** for the flow-splitting schemes. Neither a sequence-number
  format nor a buffer organisation is specified, so `cni` delivers packets in
  arrival order.
* **QoS classes** in the routers, which were mentioned only as a possibility.
* **Several interfaces per region** working together or apart. There is exactly
  one interface per router here.
* **The regions themselves.** These are programmable fabric or vendor hard IP.
  Their side of each interface is exposed as top-level ports.
* **Repeaters** on long links that cross regions. They are physical, with no
  logic function.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line:

| testbench | what it checks |
|---|---|
| `tb_txy_route` | the bit flips exactly on sent packets |
| `tb_lfsr16` | full period of 65535, no repeats, never zero, holds without `step` |
| `tb_wtxy_route` | over a full period, exactly `65535 − cxy` XY decisions for three thresholds |
| `tb_stxy_route` | all 1024 ID pairs against a bit count |
| `tb_wot_route` | random tables read back; reset value; out-of-range IDs |
| `tb_route_select` | every mode gives its scheme's bit; the toggle does not move in other modes |
| `tb_router` | random traffic from all five inputs with random output backpressure |
| `tb_cni` | packetisation under each mode, per-flit backpressure, interleaved reassembly |
| `tb_noc_fpga_top` | the whole 5×5 mesh at default parameters (see below) |
| `tb_wot_hotspot` | single-hotspot workload with route tables from a min-max search (see below) |
| `tb_complex_traffic` | three random hotspot patterns; measured busiest link equals the testbench's load model under XY, YX, parity and searched tables |

`tb_router` checks these properties:

* each packet leaves on the port given by the testbench's own route model;
* packets on one output VC never interleave;
* packets of one input VC keep their order;
* nothing is sent to a VC that is not ready;
* a flit leaves one clock after entering an idle router.

It also requires wormhole blocking, stalls and VC interleaving each to occur at
least once.

`tb_noc_fpga_top` first measures link loads on a two-hotspot example: hotspots
at (1,1) and (2,1), with every node sending equally to both. It counts head
flits on every link, adding both directions of a link together. The busiest
link must carry:

| scheme | measured (flows per link) | expected | note |
|---|---|---|---|
| plain XY | 15 | 15 | |
| plain YX | 25 | 25 | |
| even toggle | 15 | 15 | |
| weighted toggle, threshold for 2/3 | 13.1 | about 11.94 at the optimal share of about 0.66 | the generator's short-run share is 0.70–0.77 |

The testbench then runs random hotspot-biased traffic under STXY, WOT (random
tables), WTXY and TXY. It checks that:

* every packet arrives once, at the right node, with intact data;
* every packet carries the route bit the testbench's own model of the scheme
  predicts;
* the ordered schemes keep every source–destination pair in order.

It requires each of the following to happen at least once: XY routes, YX routes,
wormhole blocking, full input VCs, VC interleaving, injection and delivery
stalls, out-of-order arrival under flow splitting, and every routing mode.

`tb_wot_hotspot` sends every node's traffic to one hotspot at (4,1). The
testbench builds the per-destination tables itself, as configuration software
would. It starts from the source-parity assignment and flips one source's route
whenever that lowers the busiest link in its own load model, until no single
flip helps. It then loads the tables into the interfaces and runs the traffic
through the mesh. The busiest link measured on the RTL must match the model:

| scheme | busiest link (flows) |
|---|---|
| plain XY | 15 |
| plain YX | 20 |
| source parity | 13 |
| searched tables | 10 |

`tb_complex_traffic` draws its random patterns with three probabilities:

* each node is a hotspot with probability 0.1;
* each node sends to each hotspot with probability 0.8;
* each node sends to each other node with probability 0.05.

It runs each pattern under the four deterministic schemes and compares the
RTL's link loads with its own model. Its C++ build takes about two minutes.

To run one with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/noc_pkg.sv \
    tb/tb_noc_fpga_top.sv --top-module tb_noc_fpga_top -o sim && ./obj_dir/sim
```

The package must come first on the command line. The full-mesh test takes well under a second of wall-clock time.
