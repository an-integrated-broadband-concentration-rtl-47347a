# Fast Polling network with Binary Exponential Backoff (BEBP)

A shared cable plant built as a tree (a hybrid fiber-coax network) has one
downstream channel that everybody hears and one upstream channel that
everybody shares. This design carries LAN packets over such a tree without
collisions. The head end is a **hub**. It *polls* each node in turn, and only
a node that has just been polled may transmit upstream. The downstream
channel is a broadcast that carries packets and poll commands together.
Polling every node every time wastes the upstream channel when few nodes are
busy. The hub therefore uses **Binary Exponential Backoff Polling**: a node
that answers is polled again in the very next round. Each time a node stays
silent, the hub waits twice as many rounds before polling it again, up to a
limit.

The RTL covers the digital parts of the system:

* the hub, with the BEBP scheduler, the poll timer, the uplink router and the
  downlink multiplexer;
* a concentrator that stands in for the cable tree in a lab set-up;
* the network interface card (NIC) of a node, seen from its PC bus.

Everything works on 9-bit link symbols at one symbol per clock. At the
100 Mb/s link rate one symbol takes 80 ns.

## Link symbols and packets

Each byte on a link carries a ninth bit (defined in `rtl/bebp_pkg.sv`):

| symbol  | bits 8..0                       |
|---------|---------------------------------|
| data    | `1 d7 d6 d5 d4 d3 d2 d1 d0`     |
| poll    | `0 1 a6 a5 a4 a3 a2 a1 a0`      |
| header  | `0 0 1 0 0 0 0 0 0` (`9'h040`)  |
| trailer | `0 0 0 0 0 0 0 0 0` (`9'h000`)  |

A packet is a header, a 4-byte destination IP address, 512 data bytes and a
trailer: 518 symbols. The destination 255.255.255.255 is a broadcast. A poll
is a single symbol that names one of 128 node addresses. The hub may insert a
poll anywhere in the downlink stream, including in the middle of a packet.
Receivers pick polls out by their bit pattern, so the packet around a poll
arrives intact.

The original card's programmable-logic equations decode the control bits in
another arrangement (poll is `!d8 & d6`). The symbol table above follows the
bit-field drawing and the prose description of the link format instead. Only
`bebp_pkg` needs to change to switch to the other arrangement.

## BEBP: whom to poll, and for how long to wait

`bebp_scheduler` holds two counters per node address:

* **WL** (wait level), starting at 1;
* **CDTP** (count down to poll), starting at 1.

A polling round goes as follows:

1. Every CDTP is decremented, stopping at 0.
2. Every node whose CDTP is 0 is polled, in ascending address order.
3. After each poll the scheduler updates that node. If the node sent a
   packet, WL becomes 1. Otherwise WL doubles, up to `MAX_WL` = 256. In both
   cases CDTP is set to WL.
4. When no node with CDTP 0 is left, the next round starts.

A node that keeps answering is therefore polled every round. A silent node is
polled after 1, 2, 4, … and then every 256 rounds. The scheduler finds the
next node to poll with a priority search, so nodes that are not due cost no
clock cycles.

`hub_poll_timer` sends each poll and decides whether it was answered:

* The node has a guard time `GUARD_CYC` (25 cycles = 2 µs) to start its
  answer. The guard covers the round trip on the cable and the processing at
  both ends.
* If a header arrives on the uplink within the guard time, the poll counts
  as answered. The timer then waits a further packet time, `PKT_CYC`
  (518 cycles = 41.44 µs).
* If no header arrives, the timer moves on after the guard time.

The hub itself adds 3 to 5 cycles per poll, for the scheduler update and the
poll command path. Consecutive polls are therefore 28–30 cycles apart after a
silent node and 546–548 cycles apart after a packet.

When the timer moves on, it reports the outcome to the scheduler. The upstream
channel thus carries one burst at a time. No two nodes can collide because
only the polled node may send.

The best case is when every node answers every poll. The upstream efficiency
is then t_pkt / (t_pkt + t_gu) ≈ 95 %. Backoff keeps a single busy node from
waiting behind 63 guard times on every round.

## Hub

`hub` connects the scheduler and the timer to the packet path.

* **Uplink** (`hub_uplink_router`): symbols from the polled node are queued.
  When the fourth address byte arrives, the router makes its decision:
  * a broadcast, or an address inside the configured `subnet`/`subnet_mask`,
    goes to the local downlink buffer;
  * any other packet goes to the Ring A output, or to Ring B if `ring_b_sel`
    is set.

  Data that arrives without a header is dropped and counted (`drop_cnt`). The
  header also tells the poll timer that the node answered.
* **Downlink** (`hub_downlink_mux`): three packet buffers (1K × 9 each) hold
  local packets and packets arriving from Ring A and Ring B. They are served
  round-robin, one whole packet at a time. A poll takes the next symbol slot,
  and the interrupted packet resumes in the slot after it.
* **Counters**: `poll_cnt` counts polls sent, `resp_cnt` polls answered and
  `cycle_cnt` BEBP rounds.

The Ring A/B router modules that link hubs into a larger network are not part
of this RTL. Their packet interfaces are brought out as ports (`ring_*`).

## Concentrator

In the lab set-up a backplane replaces the cable tree: one module connects to
the hub and up to four modules connect to nodes. `concentrator` repeats the
hub's downlink to every node. Each `conc_node_module` decodes the polls on the
downlink. A module opens its 9-bit uplink buffer on a poll to its own slot
address and closes it on a poll to any other address. The uplink bus is the OR
of the module outputs. At most one buffer is open at a time, and an assertion
checks this. Only the polled node's burst therefore reaches the hub.

## Network interface card

`nic` is the node side. A PC reaches it through ISA-style memory cycles:

| address   | access | function |
|-----------|--------|----------|
| `D8xxx`   | write  | data port: `{1, byte}` into the TxFIFO |
| `D8xxx`   | read   | next received byte (through the misalignment gate) |
| `D9000`   | read   | status `{0, rx_full, rx_half, rx_empty, 0, tx_full, tx_half, tx_empty}` |
| `D9001`   | read   | interrupt flags `{…, violation, rx_packet}` |
| `D9001`   | write  | acknowledge: each 1 bit clears that flag |
| `D9002`   | write  | IP address, one byte per write, most significant first |
| `D9003`   | write  | reset strobes: bit0 TxFIFO, bit1 TxSM, bit2 RxFIFO, bit3 RxSM, bit4 re-arm gate |
| `D9004`   | write  | control port: `0x40` writes a header, `0x00` a trailer |
| `D9005`   | write  | poll mask (bit 0) |

**Sending.** The host writes a whole packet into the 1K × 9 TxFIFO: header,
address, data, trailer. `nic_txsm` counts the complete packets in the FIFO:
the count goes up when a trailer is written and down when one is sent. On a
poll to this node's address, with the poll mask clear and at least one
complete packet stored, it streams the FIFO to the link until it has sent a
trailer. A packet still being written is therefore never sent in halves.
`tx_en` is high for the length of the burst: it is the enable for the
burst-mode line driver. The poll mask lets the host keep the card silent
whatever the FIFO holds.

**Receiving.** `nic_rxsm` filters packets with a five-stage shift register.
The register clears on a header and advances on each address byte. The last
stage is set when all four address bytes match the card's IP address, or all
four are 255. It is set only if the RxFIFO is below half full, which leaves
room for a whole packet. Data and trailer of an accepted packet go into the
RxFIFO, and the trailer raises the receive interrupt. The header and the
address are not stored.

**Misalignment protection.** This is the least obvious part of the card. The
host driver always reads a fixed 513 bytes per packet (512 data and the
trailer). It accepts the packet only if the last byte is the trailer.

Suppose a packet on the wire is shorter than 512 data bytes. Without
protection the host would read into the next packet, and every later packet
would be misaligned. `nic_misalign` counts host reads in 513-byte windows.
When a trailer leaves the FIFO before the window ends, it closes a gate. Until
the window ends, reads return `0xFF` and do not touch the FIFO. The short
packet is rejected, and the next window starts exactly at the next packet.

A packet that is too long spreads over two windows. The second window ends
early at its trailer, so the following window is aligned again. The re-arm
strobe (`D9003` bit 4) reopens the gate at once.

## Top level and parameters

`bebp_network` wires one hub, one concentrator and `N_NIC` cards. Card *i*
answers poll address *i*. The link transmitters and receivers are replaced by
direct symbol wires. Each card's PC bus, the ring ports and the hub counters
are ports.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_NODES` | 64 | node addresses polled by the hub |
| `MAX_WL` | 256 | largest backoff, in rounds |
| `GUARD_CYC` | 25 | guard time t_gu (2 µs) |
| `PKT_CYC` | 518 | packet time t_pkt (41.44 µs) |
| `FIFO_DEPTH` | 1024 | NIC FIFOs and hub buffers (8192 models the 8K × 9 FIFO option) |
| `N_NIC` | 4 | cards on the concentrator (its four node slots) |

The packet size (512 data bytes) is a package constant, `PKT_DATA_BYTES`. The
host read window is one byte longer.

Capacity at these defaults:

* The hub handles the 64-node network and any packet up to 518 symbols.
* Shorter packets, for example 262 bytes, pass through but arrive at the host
  followed by `0xFF` filler.
* 1024-byte data fields do not fit the 1K FIFOs, the 518-cycle packet time or
  the host window.

## How this design departs from the original system

* **Polling in logic.** The original hub runs the polling and routing as a
  program on a DSP. Here the same rules run in logic: the scheduler, the timer
  and the router.
* **One clock.** Everything runs on one clock at the symbol rate. The FIFOs
  are synchronous and single-clock, whereas the FIFO chips have asynchronous
  strobes. The PC bus is modelled as one-cycle read and write strobes.
* **Answer detection.** The hub decides that a poll was answered by seeing a
  header within the guard time.
* **Ring choice.** The choice between the two rings is a static input, not a
  routing table.
* **Complete-packet count.** The transmitter counts trailers to know that a
  whole packet is stored. The original card's logic has no such count; it
  relies on the host filling the FIFO while the poll mask is set. That usage
  still works here.
* **IP register.** The card holds all four IP address bytes and matches all
  four. The original card's logic compared only the lowest byte.
* **Status details.** The half-full threshold (≥ DEPTH/2) and the `0xFF`
  value of gated reads are choices made here.
* **Not included:**
  * the serial link chips (4B/5B encoding, clock recovery, code-violation
    detection; the `vltn` inputs stand in for the last);
  * the ECL burst-mode buffer and the transformer and bridge coupling
    circuits, which are analog;
  * the dual-ring router modules;
  * the host device driver.

## Simulation

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_bebp_network rtl/bebp_pkg.sv tb/tb_bebp_network.sv
./obj_dir/Vtb_bebp_network
```

* `tb_bebp_network` runs the whole network at a reduced size: 6 poll
  addresses, 4 cards, `MAX_WL` 8, a short guard time and packet time. It makes
  every mechanism happen and counts each one:
  * polls and answers;
  * backoff of empty addresses;
  * polls inside downlink packets;
  * local, broadcast, Ring A, Ring B and ring-to-node delivery;
  * the poll mask holding a packet back;
  * dropped headerless data;
  * misaligned windows;
  * receive and violation interrupts.
* `tb_bebp_network_full` uses every default and sends two full 512-byte
  packets: one card to another, and one card to a ring.
* `tb_hub_throughput` runs the hub at its default sizes with nodes that
  answer every poll with a full packet. It measures the uplink efficiency:
  94.9 % with all 64 nodes active (the ideal t_pkt / (t_pkt + t_gu) is 95 %).
  With one active node it measures 94.5 %, once the 63 silent nodes have
  backed off. Plain round-robin polling would give 24.5 %.
* `tb_hub_pkt_sizes` repeats the all-active measurement for 64, 128, 256,
  512 and 1024-byte data fields. Each hub has its packet time set to its
  packet length. The efficiency rises from 0.714 to 0.974, each value within
  two points of the ideal L / (L + t_gu).
* `tb_bebp_scheduler` compares the scheduler against a reference model of the
  WL/CDTP rules. The other testbenches cover one block each.
