# Communication IP: a direct-network router for multi-FPGA dataflow

This RTL is a packet router that turns a set of FPGA boards into a direct
network. There is no switch box and no host in the data path. Every FPGA
carries one Communication IP:

- Compute kernels (tasks) on the same FPGA exchange packets through up to four
  **intra-node ports**.
- Tasks on other FPGAs are reached through two **inter-node ports**, which are
  the + and − neighbours of the node on a ring (a one-dimensional torus).
- Each packet carries the coordinate of its destination node and the local port
  to deliver it to. Every node on the way forwards the packet by
  **dimension-order routing**, with **virtual cut-through** switching and two
  **virtual channels** per link to avoid deadlock.
- A register file configures the node and reports its counters.
- A built-in packet generator and checker per port measure bandwidth and
  latency without any software in the loop.
- Most of a UDP/IPv4 Ethernet port is included:
  - the state machine that configures a 10G/25G Ethernet MAC core;
  - the IPv4 transmit stage;
  - ARP (address lookup, requests and replies);
  - Ethernet II framing in front of the core;
  - the receive side, which sorts frames into ARP and UDP/IPv4 and strips the
    headers;
  - a TEST_MAC generator and checker for testing the port on its own.

The default configuration is the high-performance one: 4 intra-node ports,
2 inter-node ports, and a 256-bit internal datapath. At 200 MHz that gives
51.2 Gbit/s per port.

```
            intra-node ports (tasks)                 inter-node ports (links)
   TX hdr/data FIFOs  RX hdr/data FIFOs        TX FIFOs   RX FIFOs (VC0, VC1)
          |                 ^                      |             ^
          v                 |                      v             |
   +--------------------------------------+   +---------+   +---------+
   |  switch_component:                   |-->|link_ctrl|-->| serial  |--> neighbour
   |  one dor_router per input,           |<--|  (x N)  |<--|  PHY    |<-- neighbour
   |  one rr_arbiter per output, VCT      |   +---------+   +---------+
   +--------------------------------------+
      routing_ip (with intranode_port x M, internode_port x N)

   csr_regs (register file) -- eth_reg_config -- Ethernet MAC core registers
   ipv4_tx (UDP datagram -> IPv4 packet) --+
                 ^ MAC lookup               +-> mac_tx (arbiter, framing) -> core
   arp_unit (table, requests, replies) ----+
        ^ ARP packets
   mac_rx (core -> ARP / UDP datagrams out) --> eth_test_mac checker
   eth_test_mac generator --> ipv4_tx (while a test runs)
```

## Packets

A packet has three parts:

1. a 128-bit **header**;
2. a payload of `length` bytes, carried as `ceil(length / (DW/8))` datapath
   words;
3. a 128-bit **footer**.

Headers and footers travel through header FIFOs. Payload words travel through
separate data FIFOs. A receiver therefore learns the payload size from the
header before the data arrives.

Header layout (`comm_pkg::pkt_hdr_t`):

| bits    | field                     | use in this RTL |
|---------|---------------------------|-----------------|
| 4:0     | virtual channel           | bit 0 selects VC0/VC1 on a link |
| 20:5    | PID / channel id          | carried unchanged |
| 36:21   | destination coordinate    | Z 15:11, Y 10:6, X 5:0 |
| 40:37   | intra-tile port           | local port at the destination |
| 41      | (unused)                  | |
| 42      | out of lattice            | set when the destination is outside the lattice |
| 47:43   | packet type               | carried unchanged |
| 61:48   | payload length in bytes   | sets the payload word count (up to 16383 bytes) |
| 109:62  | destination virtual address | carried unchanged |
| 119:110 | number of hops            | +1 on every inter-node hop |
| 127:120 | ECC_CR                    | SECDED check bits over bits 119:0 (when enabled) |

The footer is opaque to the router. The internal generator puts a marker and
the packet number in it.

## Routing: dimension order on a torus

`dor_router` is combinational. It takes:

- a header;
- the node's own coordinate (`COORDME`);
- the lattice size (`LATTICESIZE`);
- whether the packet arrived on a link, and on which dimension.

It works as follows:

- **Dimension order.** X is resolved first, then Y, then Z. For each dimension
  the router takes the shorter way round the ring; a tie goes in the +
  direction. Once all offsets are zero, the packet goes to the local port named
  by the header's intra-tile field.
- **Link ports.** With N inter-node ports there are N/2 ring dimensions.
  Output port `M+2d` is the + link of dimension d, and `M+2d+1` is its − link.
  The default N=2 gives one ring, in X.
- **Out of lattice.** The packet is delivered locally, to port
  `intratile_port mod M`, and the out-of-lattice bit is set, in two cases:
  - the destination lies beyond `LATTICESIZE`;
  - the destination differs from this node in a dimension that has no links.
- **Virtual channels (dateline).** Two VCs per link break the cyclic
  dependency that a ring creates. The rules:
  - A packet enters a dimension on VC0.
  - It keeps its VC while it stays in that dimension.
  - It moves to VC1 when it crosses the wrap-around link: + out of the last
    node, or − out of node 0.

  Each VC has its own receive FIFOs, so packets on VC1 can always drain.
- **Hop count.** Every inter-node output adds one to `num_hops`.

## Switching: virtual cut-through

`switch_component` connects M+2N inputs to M+N outputs:

- the inputs are the intra-node TX FIFOs, plus one input per receive VC of each
  link;
- the outputs are the intra-node RX FIFOs and the link TX FIFOs.

Each input has its own router. Each output has a round-robin arbiter
(`rr_arbiter`); its priority pointer moves past each winner.

A header at the head of an input becomes a request for its output only if that
output can hold the **whole** packet: at least 2 free header entries (header
and footer) and at least `nwords` free data words. That check is what makes
this virtual cut-through rather than wormhole switching. A granted packet can
never stall half-way through the switch. Congestion therefore backs up only
into whole-packet buffers.

Timing per output:

| cycle | what moves |
|---|---|
| grant cycle | header written, with its updated VC and hop count |
| next `nwords` cycles | one payload word per cycle |
| then | footer |

An input is marked busy while one output serves it. An immediate assertion
checks that no input is ever served by two outputs. The `wait_evt` outputs flag
inputs that hold a header but were not granted. They count contention in
testbenches.

From a header at the head of an input FIFO to the header in a free output FIFO
is one clock cycle. The payload follows at one word per cycle.

## Ports and FIFOs

Every port keeps headers/footers and payload in separate FIFOs (`sync_fifo`:
first-word fall-through, with used/free counts and a write-to-full exception
pulse).

- **`intranode_port`** has a TX and an RX header FIFO and a TX and an RX data
  FIFO. It also has the port's performance block, whose generator and consumer
  can take over the TX write side and the RX read side. It keeps the eight
  read/write counters and four write exceptions that the register file shows.
- **`internode_port`** has TX header and data FIFOs, and RX header and data
  FIFOs for each VC. The link controller writes incoming words into the FIFO
  pair of the packet's VC. It keeps twelve counters.

Depths are parameters, as address widths:

| Parameter | Default | Depth |
|---|---|---|
| `HAW` | 4 | 16 headers |
| `DAW` | 8 | 256 data words |

A 4 KB packet at 256 bits is 128 words, so each data FIFO holds a
maximum-size packet with room to spare.

## Inter-node links (`link_ctrl`)

The link controller turns one inter-node port into a stream of typed link
words (`lk_kind_t`: idle, credit, header, data, footer), one DW-bit word per
cycle. The serial PHY (Aurora 64B/66B in the original system) carries the
stream. It is not part of this RTL; the stream is brought out as `phy_*`
ports.

- **Sending.** A packet is sent as header, payload, footer, back to back. Three
  conditions must hold before a new packet starts:
  - the PHY is up;
  - the `wait_cycles` quiet cycles since the last footer have passed;
  - the peer's last report does not mark the packet's VC **red**.
- **Red/credit flow control.** A receive VC is red when its header FIFO has
  fewer free entries than `red_hdr_thr`, or its data FIFO fewer than
  `red_dat_thr`. Every `credit_period` cycles, the controller sends a credit
  word carrying the two red bits of its own receive FIFOs. The word is sent
  between packets, never inside one. The peer's red state starts red, and is
  forced red while the PHY is down.

  The thresholds must cover what can still arrive after the red state is
  reported. That is the packets in flight plus one credit period. The
  end-to-end test uses 6 header entries and 170 data words.
- **Header EDAC.** When a link's EDAC field is `4'hF`, the transmitter writes
  SECDED check bits into ECC_CR, using `hdr_ecc`. The code is an extended
  Hamming code: 7 check bits at power-of-two positions of a 127-bit word,
  plus overall parity. The receiver handles errors as follows:
  - a single-bit error is corrected and counted in `err_single`;
  - a double error is counted in `err_fatal`, and the whole packet (header,
    payload and footer) is dropped.
- **Destination override.** When enabled for a link, each outgoing header's
  coordinate is replaced by `LINK_0_CONFIG_0[15:0]`. ECC is recomputed after
  the override.
- **Counters.** The controller counts words in each direction:
  - magic: credit words;
  - start;
  - header;
  - footer.

## Performance blocks

Each intra-node port has a generator, a consumer, and a clock counter
(`perf_counter`).

- **Generator** (`pkt_generator`):
  - `PKTGEN_CONFIG_0` sets the number of packets (bits 15:0), the payload
    length (29:16) and header-only mode (bit 31).
  - `PKTGEN_CONFIG_1` sets the destination coordinate. The destination port is
    the generating port itself.
  - The generator writes one word per cycle whenever its FIFO has room. The
    payload is a self-describing pattern (`comm_pkg::test_lane`), so the
    consumer needs only the header to check it.
  - Its status is OFF=0, IDLE=1, TX_HEADER=2, TX_PAYLOAD=3, TX_FOOTER=4.
- **Consumer** (`pkt_consumer`):
  - It drains the RX FIFOs and checks every payload word.
  - It raises `test_ok` when the expected number of packets arrived with no
    errors.
  - Its status byte is `{state[2:0], test_ok}`: OFF=0, IDLE=1, COUNT=2.
- **Clock counter:**
  - It starts at 1 with the first generator write.
  - It stops at `test_ok`, or at the generator's last footer if the consumer
    is off.
  - On a local loop of 8 packets of 4 KB (1024 payload words), it reads 1041
    cycles, 98% of one word per clock.

The port enables are `PERF_INTRANODE_CF`: generator in bits 3:0, consumer in
bits 11:8.

## Register file (`csr_regs`)

Registers are 32 bits, at the byte offsets in `comm_pkg`. The port is a simple
strobe interface, not AXI4-Lite:

- `reg_wr` writes in the same cycle;
- `reg_rd` returns `reg_rdata` one cycle later, with `reg_rvalid`.

| offset | register | notes |
|---|---|---|
| 0x010 | RESET_REG | write bit 0: soft reset of the datapath for 200 cycles, then self-clears |
| 0x014 | REVISION | parameter, default version 2 revision 0 |
| 0x018 | COORDME | own coordinate |
| 0x020 | LATTICESIZE | resets to 0xffffffff |
| 0x030 / 0x034 | PERF_INTRANODE_CF / PERF_INTERNODE_CF | generator/consumer enables |
| 0x038 / 0x040 | PKTGEN_CONFIG_0 / 1 | generator count/length/header-only; destination |
| 0x050 | PERF_INTRANODE_ST | one status byte per port |
| 0x058 + 4p | PERF_INTRANODE_CNTp | clock counters |
| 0x070 + 40p | INTRANODE_FIFO_STS_RX/TX, 8 counters | port p |
| 0x110..0x118 | LINK_0_CONFIG_0..2 | EDAC enables [31:24], new-destination enables [17:16] and coordinate [15:0]; red thresholds; credit period [15:8] and waiting cycles [7:0] |
| 0x140 + 40l | link l status, errors {single, fatal}, 8 counters | |
| 0x1B8 + 48l | link l FIFO counters (12) | |
| 0x258 | FIFO_INTRANODE_EXC | sticky write exceptions, bit 8k+p |
| 0x260 | FIFO_REGISTER | FIFO address widths |
| 0x264 | TRANSCEIVER status | PHY up / error per link |
| 0x320..0x328 | IP address, MAC low/high | reset to 192.168.0.2 and d0:0b:ac:c0:aa:aa |
| 0x32C..0x338 | ETH TX/RX byte counters (LSB/MSB) | from the Ethernet statistics |

The configuration registers are shared by both links. LINK_0_CONFIG_2 bit 6 is
both the top-but-one bit of the waiting-cycle field and the Ethernet
statistics **tick**. Writing the register with bit 6 set also pulses the tick.
Software that only wants the tick should write the register a second time,
with its normal waiting-cycle value.

## Ethernet port pieces

- **`eth_reg_config`** configures the 10G/25G Ethernet core over a
  request/acknowledge register port. Its sequence is:
  1. MODE_REG (0x0008) = 0x40000000, which makes the statistics update on a
     tick;
  2. CONFIGURATION_RX_REG1 (0x0014) = 0x33;
  3. CONFIGURATION_TX_REG1 (0x000C) = 0x3003;
  4. GT_RESET_REG (0x0000) = 1, held `RESET_HOLD` cycles, then 0;
  5. wait for the channel to sync;
  6. TICK_REG (0x0020) = 1, which clears the statistics;
  7. **init done** (`channel_ok`).

  After that, each tick writes TICK_REG and reads back the TX and RX byte
  counters (64 bits each) into the register file. The statistics offsets are
  parameters; their values are assumptions.
- **`ipv4_tx`** wraps one UDP datagram in an IPv4 packet:
  - Datagrams longer than 1480 bytes raise `err` and are discarded.
  - A broadcast destination (255.255.255.255) goes straight to the transmit
    arbiter with MAC ff:ff:ff:ff:ff:ff. For any other destination, `ipv4_tx`
    first asks the ARP block for the MAC.
  - After the grant, it emits two header words, then the datagram:
    - word 0: 0x45, TOS 0, total length, identification, flags 0;
    - word 1: TTL 0x80, protocol 0x11, checksum, source IP;
    - the datagram follows, led by the destination address.
  - Output words are 64 bits with big-endian bytes, plus a byte count on the
    last word.
- **`arp_unit`** resolves IPv4 addresses to MAC addresses:
  - A small table (`ENTRIES`, default 4) maps IP to MAC. New entries replace
    old ones in round-robin order.
  - A lookup that hits answers in two cycles. A miss sends a broadcast ARP
    request: frame destination ff:ff:ff:ff:ff:ff, operation 1. The request is
    repeated every `RETRY` cycles until a reply arrives. The reply fills the
    table and the waiting lookup is answered.
  - A received request whose target IP is this node's gets a unicast reply,
    operation 2. The reply carries this node's MAC as sender and the
    requester's MAC as target.
  - The sender of any accepted request or reply is learned.
  - Packets with another hardware type, protocol type, address lengths or
    target IP are ignored.
  - The ARP packet is 28 bytes: hardware type 1, protocol type 0x0800,
    lengths 6 and 4, operation, then sender MAC/IP and target MAC/IP. Received
    packets come from `mac_rx` as four 64-bit words.
- **`mac_tx`** is the single way into the Ethernet core:
  - Its arbiter grants `ipv4_tx` or `arp_unit`, alternating priority after
    each frame.
  - It builds an Ethernet II frame: destination MAC, source MAC, EtherType
    (0x0800 for IPv4, 0x0806 for ARP), then the payload.
  - Payloads shorter than 46 bytes are padded with zeros, so that the frame
    reaches 64 bytes once the core appends the 4-byte FCS. The core computes
    the FCS because the configuration enables FCS insertion (0x3003).
  - A 16-byte packing buffer shifts the payload behind the 14-byte header
    without bubbles. The output is a 64-bit AXI4-Stream with byte 0 in
    `tdata[7:0]` and `tkeep`/`tlast`.
- **`mac_rx`** takes the frames the core receives. The core has already
  removed the FCS (the configuration enables FCS deletion).
  - Frames for another MAC (neither this node's nor broadcast) are dropped.
  - EtherType 0x0806: the 28-byte ARP packet goes to `arp_unit`.
  - EtherType 0x0800: the packet is kept only if it is plain UDP (version 4,
    IHL 5, protocol 17, not a fragment) for this node's IP or for
    255.255.255.255. Its datagram (UDP header and payload) comes out on
    `eth_udp_rx_*` with the source IP.
  - Anything else is dropped. Padding is cut using the ARP size or the IPv4
    total length.
  - Header fields are captured as their words pass. Payload bytes start at
    offset 14 (ARP) or 34 (IPv4), so a 16-byte packing buffer realigns them
    to 8-byte words. The destination IP check finishes with the first payload
    word, before the buffer can emit anything.
  - The IPv4 header checksum is not verified. There is no back-pressure,
    because the core's receive stream has none.
- **`eth_test_mac`** tests the Ethernet port without the router:
  - `eth_test_start` sends `TEST_MAC_PKTS` datagrams (default 1) to
    192.168.0.2. While the generator runs, it owns the IPv4 transmitter's
    datagram input.
  - Each datagram has a fixed UDP header: ports 0xfa62, length 520, checksum
    0. Its payload is 64 words (512 bytes) from a 64-bit LFSR,
    x^64 + x^63 + x^61 + x^60 + 1 with XNOR feedback, restarted from `SEED`
    for every packet.
  - The checker looks at every received datagram. Those that start with the
    test header are compared word by word with its own copy of the LFSR. It
    counts payload words, errored words (including a wrong word count) and
    packets.
  - Two nodes make a complete test: one generates, the other checks. The
    generator's first datagram triggers an ARP exchange like any other.

## Interfaces of the top (`comm_ip_top`)

- **Register port:** `reg_*`.
- **Per intra-node port p:**
  - TX FIFO write side: `tx_hdr_wr/data/full`, `tx_dat_wr/data/full`;
  - RX FIFO read side: `rx_hdr_rd/data/empty`, `rx_dat_rd/data/empty`;
  - `test_ok[p]`.

  A task writes the header, then the payload words, then the footer.
- **Per link n:**
  - inputs `phy_up`, `phy_err`, `phy_tx_ready`;
  - output stream `phy_tx_kind/data`;
  - input stream `phy_rx_kind/data`.
- **Ethernet:**
  - addresses and tick out;
  - the core's register port (`eth_cfg_*`) and `eth_chan_sync`/`eth_channel_ok`;
  - the datagram input (`eth_udp_start/len/dst_ip/busy`, `eth_in_*`) and
    `eth_err`;
  - frames from the core (`eth_rx_tdata/tkeep/tlast/tvalid`);
  - received UDP datagrams (`eth_udp_rx_*`), since the UDP converter is not
    built;
  - the TEST_MAC start, busy flag and checker counters (`eth_test_*`);
  - the frame stream to the core (`eth_tx_tdata/tkeep/tlast/tvalid/tready`).

All logic is on one clock. Reset is synchronous and active high. The register
soft reset resets everything except the register file.

## Where this design departs from the original or fills gaps

- **Not built:**
  - the Aurora PHY and the Ethernet MAC core, which are vendor cores; their
    interfaces are brought out as ports;
  - the HLS aggregator/dispatcher;
  - the UDP converter, which would turn router packets into UDP datagrams
    and write received datagrams into the RX FIFOs; the datagram streams are
    top ports instead;
  - the inter-node performance generator (PERF_INTERNODE_*): its registers
    exist, but nothing drives them.
- **This design's own choices:**
  - the VC dateline rule, and the tie-break towards +;
  - the ECC code;
  - the link word format and the credit word;
  - the red comparison: fewer free entries than the threshold;
  - FIFO depths;
  - the register port protocol;
  - the payload test pattern and footer contents;
  - the IPv4 identification field (a counter) and flags (0);
  - accepting a UDP datagram of exactly 1480 bytes;
  - the ARP table size, replacement, retry interval and learning from
    requests;
  - the MAC arbiter's alternating priority;
  - the TEST_MAC LFSR polynomial and seed, and starting the test at run time
    rather than choosing it when the design is built.
- **UDP length of the test packets.** The original gives the test header's
  length as 0x0040, but also a 512-byte (64-word) payload. This design sends
  64 words and puts the real UDP length (520) in the header.
- **ARP reply contents.** The original text says the reply puts this node's
  MAC in the target field, but its own field definitions put it in the sender
  field. The reply follows the field definitions, as standard ARP does.
- **FCS.** The original puts the CRC in the MAC transmitter, but it also
  enables FCS insertion in the core. Here the core appends the FCS.
- **Register map.** The port 3 intra-node FIFO block sits at 0x0E8, continuing
  the 40-byte stride of ports 0 to 2.
- **Clock rate.** Timing at 200 MHz is not checked here, since this is not an
  FPGA implementation.

## Simulation

Every file in `rtl/` holds one module or package of the same name, and
`comm_pkg.sv` must be read first. Each block has a self-checking testbench in
`tb/` that prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_comm_ip_top \
  -y rtl -y tb rtl/comm_pkg.sv tb/tb_comm_ip_top.sv
./obj_dir/Vtb_comm_ip_top
```

The testbenches:

| testbench | what it checks |
|---|---|
| `tb_sync_fifo`, `tb_rr_arbiter`, `tb_hdr_ecc`, `tb_dor_router` | random stimulus against reference models: FIFO order and flags, fairness, random single and double header errors, routing of random coordinates and lattices |
| `tb_pkt_generator`, `tb_pkt_consumer`, `tb_perf_counter` | packet format, error detection, clock counts |
| `tb_intranode_port`, `tb_internode_port` | FIFO steering, counters, exceptions |
| `tb_switch_component` | random traffic from all inputs, per-output scoreboards, one-cycle header latency |
| `tb_link_ctrl` | two controllers back to back: VC steering, waiting cycles, red back-pressure without loss, single-error correction, double-error drop, destination override |
| `tb_csr_regs` | reset values, every register, soft reset length, sticky exceptions, tick pulse |
| `tb_routing_ip` | 300 random packets from local and link inputs to the expected output, plus a generator/consumer loop |
| `tb_eth_reg_config`, `tb_ipv4_tx` | configuration write order and values; IPv4 header, checksum, ARP/broadcast, oversize drop |
| `tb_arp_unit` | request on a miss and its retry, reply filling the table, hits without traffic, reply to a request, ignored packets, random lookups against a table model |
| `tb_mac_rx` | 400 random frames, back to back or with gaps: ARP and UDP delivered with padding removed; wrong MAC, EtherType, IP, protocol, IHL or fragments dropped |
| `tb_eth_test_mac` | generator against a transmitter model (header, LFSR sequence, packet count), checker counts for good, corrupted, short and foreign datagrams |
| `tb_mac_tx` | random frames from both sources against a byte-level model: header, payload shift, padding, `tkeep`/`tlast`, alternating grants |
| `tb_comm_ip_top` | four nodes at the default parameters in a ring, joined by delay-line link models (`tb/aurora_link_model.sv`) |

`tb_comm_ip_top` runs:

- a local loop at full rate;
- a local trip;
- one- and two-hop traffic in both directions, including the dateline;
- contention;
- red back-pressure;
- credits;
- ECC correction and drop;
- the destination override;
- out-of-lattice delivery;
- the Ethernet configuration and statistics tick;
- Ethernet frames: a broadcast datagram, an ARP reply, a unicast datagram to
  the learned host, and a datagram that waits for an ARP request and reply;
- nodes 0 and 1 with their Ethernet ports facing each other: node 1 receives
  a broadcast datagram, answers node 0's ARP request and receives a unicast
  datagram; node 0's TEST_MAC generator sends one 512-byte LFSR datagram and
  node 1's checker counts 64 words with no errors;
- soft reset.

It prints how often each mechanism fired.
