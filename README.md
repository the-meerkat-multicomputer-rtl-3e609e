# Meerkat: a multicomputer interconnect of passive buses

Meerkat links up to a few hundred processor nodes with no routers and no
buffers. The nodes sit on a square grid. Every node taps one horizontal
and one vertical passive bus. Two nodes in the same row or column talk
over that bus (a *1-bus connection*). Any other pair goes through the node
at the corner of their row and column. That node acts as a *cross point*
and joins its two buses for the length of the connection (a *2-bus
connection*). Software sets up connections explicitly: it arbitrates for a
bus, alerts the receiver, waits until the receiver is ready, copies memory
to memory at one 32-bit word per clock, and then releases the bus. The
sender and receiver always meet before data moves, and nothing in the path
stores a word. So there is no flow control in hardware and no buffer
deadlock. The cost is that a failed 2-bus arbitration must be undone by
software, with a random back-off.

This repository holds synthesizable SystemVerilog for the logic of that
interconnect. It covers a B x B grid (default 16 x 16 = 256 nodes, 32
buses) and each node's internode logic. Processors, DRAM, I/O slots, the
analog delay chains and the bus transceivers are outside the RTL; their
signals are ports of the top.

## Grid and buses

Node `n = r*B + c` taps horizontal bus `r` at position `c` and vertical
bus `c` at position `r`. From node (rs, cs) to node (rr, cr):

| case | route | cross point |
|---|---|---|
| rs == rr | horizontal bus rs | none |
| cs == cr | vertical bus cs | none |
| otherwise, H first | bus H rs, then V cr | node (rs, cr) |
| otherwise, V first | bus V cs, then H rr | node (rr, cs) |

Software picks the route. Each bus (`internode_bus`) is a wired OR of
what its B taps drive; a tap that is not driving outputs zero. Each bus
has 36 lines, the width of four 9-bit transceivers:

* forward, from the owner or the cross point: 32 data lines and 3
  word-type lines (`bus_type_e`: IDLE, XREQ, SIGNAL, DATA, LAST, RELEASE);
* backward, from the receiver or the cross point: one acknowledge line.

The assignment of the four lines beyond the 32 data bits is this design's
own choice. An assertion fires if two taps drive the forward lines in the
same cycle.

## Arbitration (`bus_arbiter`)

Every bus has an arbiter. It grants the bus to one tap at a time, and on
every cycle it tells every tap who the master is (`owner_valid`,
`owner`). An attempt is a one-cycle `req`. The next cycle brings either
`gnt` or `fail`, and nothing is queued:

* a request to an owned bus fails;
* among simultaneous requests to a free bus, one wins in round-robin
  order and the others fail;
* the owner frees the bus with a one-cycle `rel`.

Because a failed attempt is reported rather than kept waiting, a node
that holds the first bus of a 2-bus connection learns that the second bus
is busy. Software must then release the first bus and retry after a
random delay. This is what keeps two half-built connections from waiting
on each other forever.

## The bus interface and its five commands (`bus_interface`)

A processor writes a command word (`cmd_t`) to the node's CMD register.
Every command names a tap, H or V.

| command | effect |
|---|---|
| arbitrate | Request the tap's bus. With `two_bus`, `pos` names the cross point on that bus. The result appears in the tap status: `owned`, or `arb_fail`. `arb_fail` together with `two_bus` means the first bus is still held and must be released. |
| signal | Send a SIGNAL word naming the receiver's position `pos` on the last bus of the connection. This sets `sig_sent` here and `sig_pending` in the receiver; `sig_pending` is also an interrupt source. |
| data-receive | Issued by the receiver, with the buffer address in ADDR. It clears `sig_pending`, arms the DMA engine and raises the acknowledge line: the node is *receptive*. |
| data-send | Issued by the sender after `rx_ready`, with ADDR and `count` (1..1024 words). The DMA engine streams the words onto the bus, and the last one is marked LAST. |
| release | Free the bus. A 2-bus connection first sends a RELEASE word, which makes the cross point free its own bus. |

On the sender, `rx_ready` is set (and `sig_sent` cleared) when the
acknowledge line rises after a signal. The receiver drops the acknowledge
line on the LAST word. So one connection can carry any number of packets,
each with its own signal / data-receive / data-send rendezvous. A command
that is not allowed in the current state is ignored, and `err` in
DMA_STAT is set.

Each tap has an owner state machine:
`IDLE -> ARB_REQ -> ARB_WAIT -> SETTLE -> [XWAIT] -> CONN -> REL`.
There is also `HELD`, for a first bus kept after a failed 2-bus attempt.
`SETTLE` is the cycle lost after every change of bus master, while the
receivers' delay chains adjust.

### How a 2-bus connection is built

1. The sender wins its first bus and sends `XREQ(pos)` on it.
2. The node at `pos` accepts only if neither of its own taps is in use. It
   then arbitrates for its other bus.
3. If that succeeds, the cross point pulses the acknowledge line on the
   first bus for one cycle. From then on, through one register in each
   direction, it forwards every forward word from the first bus to the
   second, and the acknowledge line back the other way.
4. SIGNAL words carry a "still on the first bus" flag (data bit 8). The
   cross point clears this flag as it forwards the word. Nodes on the
   first bus therefore never mistake a signal for their own.
5. If no acknowledge reaches the sender within `XTIMEOUT` (8) cycles, the
   attempt has failed.
6. The connection ends when the cross point forwards RELEASE and frees its
   bus.

While a node is a cross point, any arbitration its own processor tries on
either bus fails.

The XREQ word, the acknowledge pulse, the timeout and the flag bit are
this design's own handshake. What is given is only that the cross point
acquires the second bus and joins the two.

### Timing

Counted from the cycle in which the command is written (cycle 0), and
checked by the testbenches:

* arbitration request on the bus in cycle 1, answer in cycle 2;
* 1-bus connection up (`owned`) in cycle 4, 2-bus connection in cycle 8;
* first packet word on the bus in cycle 3 after data-send, then one word
  every clock. Every packet in every testbench is checked to be written
  into the receiver's memory on consecutive cycles;
* a cross point adds one cycle of latency in each direction.

## DMA engine (`dma_engine`)

The engine copies packets between node memory and the bus, so the
processor never touches the data.

* **Send:** one read per cycle, and each word is handed to the bus one
  cycle later.
* **Receive:** each arriving word is written in the cycle it arrives.

The memory port must take one access every cycle and return read data
one cycle after the read. With no buffering and no flow control, the
memory has to keep up with the bus. Each node has one engine, so a node
moves one packet at a time, although it may own both buses.

## Skew compensation (`skew_table`)

All nodes run on one distributed clock, but any two may be up to half a
cycle apart. Each tap has a programmable delay chain on its received
clock. The table has 2 x B entries of 6 bits, indexed by tap and by the
current master's position. Software loads it in a calibration run. Each
cycle the node looks up the entry for each tap's current master and sends
it out on `delay_sel`. After a change of master the new setting arrives
one cycle later, and `delay_adjusting` is high for that cycle.

The delay chains themselves are analog parts and are not in the RTL.

## Rest of the node (`meerkat_node`)

* `cycle_counter`: a free-running 32-bit counter that software can
  write.
* `interrupt_controller`: six level sources, each ANDed with a mask for
  each of the node's four processors. The sources are: signal on H,
  signal on V, send done, receive done, and two S-Bus slots. Masking the
  signal sources and polling STAT_H / STAT_V is how a receiver that
  expects a packet avoids the interrupt latency.

Register map (word addresses; reads return data one cycle after the
request):

| addr | name | contents |
|---|---|---|
| 0 | CMD | write: command (`cmd_t`: op[2:0], tap[3], two_bus[4], pos[15:8], count[31:21]); read: last command |
| 1 | ADDR | DMA word address |
| 2, 3 | STAT_H, STAT_V | `tap_status_t`: settle, owned, arb_busy, arb_fail, two_bus, sig_sent, rx_ready, sig_pending, receptive, xpoint |
| 4 | DMA_STAT | busy, send_done, recv_done, err, rx_count[14:4] |
| 5 | CYCLE | cycle counter |
| 6 | IRQ_PEND | interrupt sources |
| 7 | IRQ_EN | write {cpu[17:16], mask[5:0]}; read the four masks, 8 bits each |
| 8 | SKEW | write {tap[16], pos[15:8], delay[5:0]}; read the entry last written |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `B` | 16 | nodes per bus; the system has B*B nodes. 16 is the largest size the buses' electrical limits are expected to allow. The 4-node prototype is B = 2. |
| `AW` | 23 | word address bits of node memory (32 MB) |
| `NCPU` | 4 | processors per node |
| `MAX_PKT` | 1024 | packet limit in words (package) |
| `DELAY_W` | 6 | skew entry width; the stated range is 4 to 6 bits (package) |
| `XTIMEOUT` | 8 | cycles to wait for a cross point's answer |

## Measured behaviour

These results come from simulating the default 16 x 16 system. Processor
software is modelled only by its register accesses, so these numbers are
upper bounds: real message-passing code adds per-message overhead.

* **Light load, one pair of nodes** (`tb_light_load`): 1.7 bytes/clock
  for 64-byte messages, 3.84 for 2 KB, and 3.95 for 100,000 bytes (25
  packets). The peak is 4 bytes/clock: 80 MB/s at the prototype's
  20 MHz, 400 MB/s at 100 MHz.
* **Heavy load** (`tb_heavy_load`): rows 0-7 exchange messages with
  partners eight rows down, over the 16 vertical buses. The test reports
  the bisection throughput, bytes moved divided by half the round trip.
  It reaches 56.5 bytes/clock with 100-byte messages and 113.9 with
  1000-byte messages. By this measure the bound is 128 bytes/clock,
  because each vertical bus carries 16 messages per round trip. The
  arbiters turned away about 9,600 attempts, which software retried
  after a back-off.

## What departs from, or goes beyond, the description

* The bus line encoding, the cross-point request/acknowledge handshake
  and its timeout, the RELEASE word and the SIGNAL flag bit are this
  design's own choices.
* Single-attempt round-robin arbitration, with the arbiter placed beside
  each bus.
* One DMA engine per node; the memory port has fixed one-cycle latency
  and never stalls.
* The register map, the interrupt controller's sources and its
  per-processor masks.
* Not modelled: processors and caches, DRAM, S-Bus, the 9-bit debug bus
  and its host interface (its protocol is not defined here), the delay chains,
  the GTL transceivers and the backplane.
* Reset clears all state; skew entries reset to 0.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. To build and run
one with Verilator:

```
verilator --binary --timing --assert --top-module tb_meerkat_top \
    rtl/meerkat_pkg.sv rtl/*.sv tb/tb_meerkat_top.sv
./obj_dir/Vtb_meerkat_top
```

| testbench | what it runs |
|---|---|
| `tb_meerkat_top` | The full 256-node system end to end. It covers 1-bus transfers on H and V buses, 2-bus transfers routed both ways, several packets per connection, a maximum-size packet, interrupt-driven and polled receivers, an arbitration lost to a busy bus, simultaneous requests, a failed 2-bus attempt with release and back-off, a cross point locked out of its own buses, and delay-chain adjustment. |
| `tb_light_load`, `tb_heavy_load` | The two throughput workloads. |
| `tb_prototype_2x2` | The four-node arrangement (B = 2): transfers on both bus directions, 2-bus transfers routed both ways, a full packet. |
| `tb_<module>` | Unit tests, one per module. |
