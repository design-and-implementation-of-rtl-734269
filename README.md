# Cartesian router in SystemVerilog

A Cartesian router forwards packets without a routing table. Every router's
address is its physical position: a 64-bit latitude followed by a 64-bit
longitude. When a packet arrives, the router compares the packet's
destination with its own address and sends the packet on in the matching
direction. So one comparison replaces the table lookup.

This RTL builds such a router as a set of identical, independent ports. Each
port has its own detection, decision and storage logic. There is no central
controller. A port that has decided where a packet goes passes it straight
to the port that will send it. It uses one data wire and one "activator"
wire, and the activator tells the receiving port to start recording.

Two router kinds are built from the same port:

| `KIND` | ports | use |
|---|---|---|
| `ARTERIAL` (default) | local, east, west, north, south | junction router: routes by latitude, then longitude |
| `COLLECTOR` | local, east, west | router along a line: passes through anything for another latitude |

Port numbers are fixed by `cart_pkg::port_e`: 0 local, 1 east, 2 west,
3 north, 4 south. The local port connects the router's own host.

## Routing rule

The rule is `cart_pkg::route()`. Let `D` be the destination address and `R`
the router's address.

- **Arterial router.**
  - If the latitudes differ, the packet goes north when `D.lat > R.lat` and
    south otherwise.
  - If the latitudes match, it goes east when `D.lon > R.lon` and west when
    `D.lon < R.lon`.
  - If both match, it is kept and leaves by the local port.
- **Collector router.**
  - A packet whose latitude differs is assumed to be travelling correctly and
    passes straight through: in at west, out at east, and the reverse.
  - If the latitude matches, the router decides on longitude as an arterial
    router does (east, west or keep).
  - A packet injected at the local port with a different latitude is also
    routed by longitude. If its longitude is equal too, it is discarded.
- **Both kinds.** A packet that would leave by the port it arrived on is
  discarded. This stops two neighbours from bouncing a packet for a
  non-existent address back and forth forever.

The original design fixes which comparison comes first and the discard
rule. This implementation chose the sense of the comparisons: a larger
latitude is north, a larger longitude is east.

## Line format

Each port has one serial input `rx[p]` and one serial output `tx[p]`. Each
carries one bit per clock, and both idle at 0. A packet on the line is:

```
111111  0  <latitude: 64 bits, MSB first>  <longitude: 64 bits, MSB first>  <payload>  111111
 SOP                                                                                  EOP
```

- **Markers.** Six consecutive ones mark both the start (SOP) and the end
  (EOP) of the packet.
- **No six ones inside.** Between the markers there must never be six ones
  in a row. The sender is responsible, for example by inserting a 0 after
  five ones. The payload must end in 0 so that it cannot merge with the EOP.
- **The 0 after the SOP.** It closes the start marker, so the address always
  begins at the 8th bit of the packet. No other header is defined.
- **Gap between packets.** Packets on one input need at least one idle 0
  between them. The router's own outputs always leave more than one.

The router sends each packet unchanged, markers included. It does not strip
or re-stuff bits.

## Inside a port (`cart_port`)

```
 rx ──► PDM ──┬──► DMM ── decision lines ──► IPS ──► links to the OPS of other ports
              └─────── packet + frame ─────► IPS
 links from the IPS of other ports ──► OPS ──► tx
```

The receive path and the transmit path of a port run independently.

### Packet detection (`pdm`)

The PDM is a six-bit shift register with an AND of all its bits. The AND
output `X` is high whenever the register holds a marker. A four-state
machine follows the packet:

```
WAIT --X--> SOP --!X--> DATA --X--> EOP --(5 clocks)--> WAIT
```

- **`receiving`.** This is the port's RECEIVING flag. It is high in DATA and
  EOP.
- **`pkt_out`.** The register's last stage. It is the line delayed by six
  clocks, so logic behind the PDM sees the whole SOP marker.
- **`frame`.** It covers exactly the packet's bits at `pkt_out`, from the
  first SOP one to the last EOP one.

There are three PDMs per port:

- one at the input;
- one at the IPS output, which finds the end of the packet being forwarded;
- one at the OPS output, which finds the end of the packet being sent.

### Decision making (`dmm` with `pcm`, `acm`, `rap`, `adm`)

The decision is made bit-serially while the address streams past.

- **`pcm`** counts packet bits from the rise of RECEIVING. After `PCM_N` = 5
  of them it raises RECEIVING-ADDRESS: the next bit at `pkt_out` is the
  first address bit.
- **`acm`** counts the address bits with an 8-bit counter.
  - Count bit 6 separates the latitude half (RECEIVING-LATITUDE) from the
    longitude half (RECEIVING-LONGITUDE).
  - Count 127 gives ADDRESS-RECEIVED.
- **`rap`** holds the router address in two 64-bit registers. It shifts them
  out, MSB first, in step with the incoming address.
- **`adm`** is a serial magnitude comparator: the first bit where `DA` and
  `RA` differ decides `DA>RA` or `DA<RA`. It restarts at the first bit of
  each half.
- **The decision.** The latitude result is kept after bit 63. At
  ADDRESS-RECEIVED the routing rule lights exactly one decision line. Each
  other port has one line; the local port's line means "keep". There is one
  further line for discard.
- **Holding the decision.** The line stays lit until the IPS takes it (`ack`).
- **Short packets.** A packet that ends inside its address gets the discard
  line. This way every recorded packet has a decision.

The decision comes `PCM_N + 128` = 133 clocks after RECEIVING rises.

### Incoming packet storage (`ips`, `signal_holder`, `ser_fifo`)

- **Recording.** The IPS records every packet, SOP to EOP, into a serial
  queue while the PDM's `frame` is high.
- **Taking the decision.** The decision lines go into a `signal_holder`: one
  flip-flop per line, loaded only while no packet is being forwarded.
- **Forwarding.** While a held line is high, the queue is read at one bit per
  clock through the output PDM. The bit is ANDed with each held line, so it
  appears only on the link of the chosen port. The held line itself is that
  link's activator.
- **Discard.** A discarded packet is read out in the same way, but to no
  link.
- **End of the packet.** The output PDM sees the EOP. Reading stops, and the
  zero padding left in the current queue word is dropped. Once the marker
  has left the PDM, the holder is reloaded.
- **Gap.** The activator therefore drops for at least one clock between two
  packets sent to the same port.

Forwarding is cut-through: it starts as soon as the decision is held, while
the packet's tail is still arriving. Recording and reading both move one bit
per clock, and the decision only comes after the whole address has been recorded. So
the queue cannot run dry mid-packet; the assertion `a_no_underrun` checks
this.

### The serial queue (`ser_fifo`, `word_fifo`, `clk_div`)

A queue is built from three parts:

- an input shift register that converts serial to parallel;
- a word FIFO of `DEPTH` words of `WORD_W` bits;
- an output shift register that converts parallel to serial.

**Word counters.** Each converter uses a `clk_div` as its word counter: a
binary counter whose last count gives a one-clock strobe every `WORD_W`
bits. The counter is cleared whenever recording stops, so each recording
starts on a word boundary.

**Partial last word.** When recording stops with a partly filled word, the
word is padded with zeros and stored.

**Naming in the original drawings.** The drawings name the FIFO strobes from
the converter's side: recording is "R" and transmitting is "W".

### Outgoing packet storage (`ops`)

Each OPS has one serial queue per other port: four in an arterial router,
two in a collector. Several ports can therefore send to the same output at
the same time without waiting.

- **Recording.** A queue records while its link's activator is high.
- **The MUX.** A counter drives a MUX that lets one queue transmit at a time,
  through a PDM to `tx`.
- **Advancing the counter.** The counter moves on when either of these
  happens:
  - the packet being sent has ended, as seen by the PDM, once the EOP has
    left it;
  - the queue it points at is empty.
- **Fairness.** The queues are served in turn, so no input starves.

**Definition of "empty".** Here "empty" means "holds no complete packet".
Each queue counts the whole packets it holds: one more when an activator
pulse ends, one fewer when a packet has been sent. So the OPS is
store-and-forward: a packet starts on `tx` only after it has arrived whole.

This guards against one failure. With the FIFO's plain empty flag, the MUX
could start on a packet that is still arriving. If the queue then ran dry
for a moment, the MUX would move on half way through the packet.

## Timing

Everything runs on one clock `clk`, one line bit per clock. `rst_n` is an
active-low synchronous reset. The original design uses AND-gated clocks
(clock ANDed with a control line). Here every such gate is a clock enable.

Transit time is measured on an idle arterial router from the first SOP bit
on `rx` to the first SOP bit on `tx`. It is the packet length plus 162 to 165
clocks. The parts are:

| part | clocks |
|---|---|
| input PDM delay | 6 |
| decision | 133 |
| signal holder and IPS read-out | about 10 |
| IPS output PDM | 6 |
| full packet stored in the OPS | packet length |
| MUX reaching the queue | 1–4 |
| OPS output PDM | 6 |

With contention, a packet also waits for the packets ahead of it at the
same OPS.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `KIND` | `ARTERIAL` | router kind |
| `WORD_W` | 8 | queue word width: the 8-bit serial/parallel converters |
| `DEPTH` | 512 | words per queue: a 512×9 FIFO part, of which 8 bits are used |
| `cart_pkg::MARK_LEN` | 6 | marker length |
| `cart_pkg::PCM_N` | 5 | bits before the address, counted from RECEIVING |
| `cart_pkg::LAT_W`, `ADDR_W` | 64, 128 | address fields |

**Queue capacity.** Each queue holds 4096 bits, so the longest packet
(markers included) is a little under 4096 bits.

**Arterial router at the defaults.** It has 25 queues: 5 IPS queues and
4 queues in each of the 5 OPSs. That is 102,400 bits of FIFO memory and
about 2,300 flip-flops.

**Collector router.** It has 9 queues: 36,864 bits and about 1,000
flip-flops.

The original design suggested that either of two small FPGAs would suffice:
a MAX 7000 EPM7128S, or a FLEX 10K EPF10K20 with 12,288 bits of embedded
memory. That holds only with external FIFO chips. On-chip queues of 512
words are too large for both devices. A collector router's queue memory
would fit the EPF10K20 at `DEPTH = 128`.

**Overflow.** There is no back-pressure: a port cannot ask a neighbour to
wait. If more traffic converges on one output than its queues can hold, the
queue drops words and raises `overflow[p]`. The packets concerned are then
corrupted. The original design deliberately avoided waiting schemes.

## Where this implementation departs from the original design, or fills gaps

- **Single clock.** Gated clocks became clock enables.
- **PDM.**
  - The original gate-level PDM network was replaced by a synchronous
    state machine with the same four states.
  - The state table of the original names the third and fourth states the
    other way round from its state diagram. The diagram's order (SOP, data,
    EOP) is used.
- **Frame.** The frame after the SOP (one 0, then the address), the bit
  order (MSB first), the gap between packets and the need for bit stuffing
  are this implementation's choices. The original only defines the six-ones
  markers and an idle-low line.
- **DMM.** The decision hand-off (decision held until acknowledged) and the
  discard of packets cut short are additions.
- **Clock divider.** It decodes the last count instead of count zero, so its
  strobe marks the last bit of a word.
- **IPS.**
  - It drops the queue-word padding after the EOP.
  - It forces a gap of at least one clock in the activator between packets.
- **OPS.** It is store-and-forward, as explained above.
- **Router address.** It is an input port (`router_addr`). Non-volatile
  storage is outside the design.
- **Not built.**
  - The clock oscillator and the address EEPROM, both bought-in parts.
  - Arterial routers with three or six external ports: no directions are
    defined for them.
  - Control packets and network-state handling, which the original design
    also leaves out.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
block tests compare against models written independently of the RTL:

- routing reference: `tb_cart_util::ref_route`;
- a queue model;
- prefix comparisons for the comparator;
- bit positions computed from the generated stream for the PDM.

**Router-level tests.** `tb/tb_router_checker.sv` drives whole routers:

- `tb_cart_router` runs the arterial router at its default sizes.
- `tb_cart_router_collector` runs the collector router.

The test traffic is:

- every port sending to all nine relations of latitude and longitude
  (smaller, equal, larger);
- all ports sending to one port at once;
- packets cut short inside their address;
- random traffic on all ports together.

**What they check.**

- Every packet must leave whole and unchanged on the port the reference
  chooses, or nowhere.
- Transit latency is checked.
- Each mechanism is counted, and the test fails if one never happens:
  - routing in each direction;
  - keep;
  - both kinds of discard;
  - OPS contention;
  - the MUX skipping empty queues.

The decision latency (133 clocks) and the IPS read-out timing are checked
cycle by cycle in `tb_dmm` and `tb_ips`.
`tb_ops` also drives random traffic on all four inputs of an OPS at once.
It then sends one packet longer than a queue and checks that `overflow`
rises.

## Simulating

Use Verilator 5 and run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb rtl/cart_pkg.sv tb/tb_cart_util.sv tb/tb_cart_router.sv \
    --top-module tb_cart_router -o sim
./obj_dir/sim
```

For a block test, replace `tb_cart_router` with that testbench, for example
`tb_ops`. The full-size router test builds and runs in about ten seconds.

To try other sizes, set the top's parameters. For example, a collector
router with shorter queues is
`cart_router #(.KIND(cart_pkg::COLLECTOR), .DEPTH(128))`.

## Files

- **`rtl/`**
  - `cart_pkg`: sizes, frame constants, port numbering, routing rule.
  - `cart_router`: the top.
  - `cart_port`: one port.
  - `pdm`, `dmm`, `pcm`, `acm`, `rap`, `adm`: detection and decision.
  - `ips`, `signal_holder`, `ser_fifo`, `word_fifo`, `clk_div`: storage.
  - `ops`: outgoing storage.
- **`tb/`**
  - One `tb_<module>` per module.
  - `tb_cart_router_collector`.
  - The shared `tb_router_checker` and `tb_cart_util`.
