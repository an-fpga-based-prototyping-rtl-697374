# Multipath RDMA network: NICs and buffered crossbar switches

This is synthesizable SystemVerilog for a small cluster interconnect. Its
reference is a published FPGA prototyping platform for interprocessor
communication research. Eight hosts each have a network interface card (NIC)
with four serial links. Link k of every NIC goes to one of four parallel 8x8
buffered crossbar switches, so any two hosts are joined by four disjoint
paths.

A host moves data by remote DMA (RDMA). It writes a two-word descriptor
(source address, destination address, size, destination, options) into its
NIC. The NIC then does three things:

- It reads the data from host memory and cuts it into packets of at most
  512 bytes.
- It spreads each destination's packets evenly over the four links.
- It sends a packet only when credits say there is room for it in the next
  buffer, so no packet is ever dropped for lack of space.

The receiving NIC writes each packet straight to its destination address, in
whatever order packets arrive. It then puts only the packet headers back in
send order. That is enough to deliver completion notifications (an interrupt,
or a flag written to memory) only once all earlier data has landed.

The design parts that carry most of the subtlety:

1. the credit protocol (cumulative counters with coarse 32-word credits);
2. the split between data placed out of order and headers resequenced in
   order;
3. the single link frame format that carries both packets and credits.

## Top level and wiring

`ipc_platform` (parameters `N_NODES = 8`, `N_LINKS = 4`) instantiates:

- `N_NODES` copies of `nic_top`;
- `N_LINKS` copies of `bxbar_switch #(.N(N_NODES))`.

NIC `n`, link `k` is wired to port `n` of switch `k` in both directions.
Everything runs from one clock (`clk`) with an active-low asynchronous reset
(`rst_n`).

Each NIC's host side is brought out as arrays indexed by node:

- a target port `tgt_*`, for register and descriptor writes and register
  reads;
- a DMA memory port `mem_*`, with a request, write data and read data;
- `irq`;
- `nic_events`, 12 event pulses.

Each switch reports per-port pulses:

- `sw_pkt_out`
- `sw_credit_stall`
- `sw_overflow`
- `sw_rx_error`

The host ports are deliberately simple request/response interfaces. In the
original platform, a PCI-X target and initiator sit there; they are not part
of this RTL. Links are byte-wide symbol streams, one symbol per clock, wired
directly to each other. In hardware, a serializer/deserializer (SERDES)
transceiver with 8b/10b coding would sit between them.

## Link frames

Every link carries a stream of 9-bit symbols: 8 data bits plus a control
flag `k`. Two control symbols are used:

- `0xFB` is the start of packet (sop);
- `0xBC` is the comma, the idle filler between frames.

A frame is:

```
sop | 0..4 credits (2 bytes each) | header (8 bytes) | CRC-16(header)
    | payload (4*size bytes) | CRC-32(payload) | comma...
```

A frame with credits but no packet is just `sop | credits | comma`. Credits
therefore keep flowing when there is no data to piggyback on. Bytes go most
significant first.

The checks on each part of the frame:

- CRC-16 uses polynomial 0x1021.
- CRC-32 uses polynomial 0x04C11DB7.
- Both CRCs start from all ones, are computed MSB first, and have no final
  inversion.

A minimum packet (24-byte payload) takes 40 bytes on the wire, and a
maximum one (512 bytes) takes 528.

**Header** (`ipc_pkg::pkt_hdr_t`, 64 bits, in transmission order):

| bits  | field | meaning |
|-------|-------|---------|
| 63:54 | size  | payload length in 32-bit words (6..128) |
| 53:47 | flow  | destination host (the switch routes on `flow mod N`) |
| 46:42 | op    | bit 1 remote interrupt, bit 2 remote notification (bits 0 and 3 are used only in descriptors) |
| 41:32 | reseq | `{source node[2:0], path[1:0], sequence[4:0]}` |
| 31:0  | addr  | byte address in the receiver's memory |

The size field goes first so that the first bit of a header is always 0.
The first bit of a credit is always 1, so the receiver tells the two apart by
that bit.

**Credit** (16 bits):

- bit 15 is 1;
- bits 14:8 are the flow;
- bits 7:1 are the value;
- bit 0 is parity, chosen so that the XOR of all 16 bits is 0.

A credit with bad parity is discarded. The next credit for the same flow
repairs the loss, because credit values are cumulative.

`link_tx` builds frames from a word stream and takes credits only at
packet boundaries. `link_rx` parses frames and handles errors:

- A packet with a bad header CRC is dropped.
- A bad payload CRC is reported with the packet's last word (`out_err`).
  That word is held back until the CRC-32 has been checked.
- A control symbol inside a frame ends the packet with an error.

## Credit-based flow control

The same protocol is used on every hop: NIC to switch, switch to NIC, and,
in the reverse direction, credits for both. Counts are in 32-bit words of
header plus payload, so a packet costs `size + 2` words.

The sender (`qfc_tx_credit`) keeps, per flow:

- a 12-bit count of words sent since reset;
- the last credit received.

The receiver (`credit_scheduler`) keeps a 12-bit count of words that have
*left* its buffer since reset. It sends only the top 7 bits. The sender's
free-space estimate is therefore:

```
avail = BUF_WORDS - ((sent - {credit, 5'b0}) mod 4096)
```

This estimate is never too high. It can be up to 31 words too low, because
the last partial 32-word block is not reported until more traffic moves it.
**Two consequences:**

- A buffer must hold a largest packet plus 31 words. Otherwise a flow can
  wait forever for credits that will never come. The defaults are:
  - 2 KB crosspoints and 8 KB reception space, against 130-word packets;
  - 1024-word VOQs, against 513-word transfers.
- Counters wrap, so a lost credit costs nothing permanent: any later credit
  of the same flow carries the full state.

The credit scheduler serves credits round robin:

- first, flows whose value changed since it was last sent;
- every `REFRESH_CYCLES` clocks (default 65536), every flow once more, to
  recover credits lost on the wire.

## NIC (`nic_top`)

```
host target port -> nic_csr -> dma_req_queue -> dma_engine -> sync_fifo(16) -> voq_block
        -> multipath_tx -> 4 x [sync_fifo(128) -> link_tx] -> links
links -> 4 x [link_rx -> sync_fifo(256 x 64 bit)] -> round-robin -> dma_engine -> host memory
                                                                 \-> resequencer -> irq / notification
```

**Request queues (`dma_req_queue`).** There are 8 circular queues (one per
destination) of 128 descriptors each, held in a single 2048 x 64-bit memory.

- The host may write descriptors in any slot order.
- Nothing is released until a descriptor arrives with the *start flag* (bit
  63 of word 1).
- At that point, every descriptor from the queue head up to that slot is
  released at once. A whole batch, such as a scatter, can thus be prepared
  in advance and then fired with one write.

Descriptor word 0 is the source address. Word 1 is laid out as follows:

| bits  | field                          |
|-------|--------------------------------|
| 31:0  | destination address            |
| 41:32 | size in 64-bit words (max 512) |
| 48:42 | flow (destination host)        |
| 53:49 | op                             |
| 63    | start                          |

The op bits are:

- bit 0: local notification;
- bit 1: remote interrupt;
- bit 2: remote notification;
- bit 3: benchmark mode, which sends zeros instead of reading host memory.

**DMA engine (`dma_engine`).** On the transmit side it:

1. reads a descriptor in two clocks and starts on the third, so the
   transfer header appears three clocks after release, as in the reference;
2. sends a transfer header and then the data words to the VOQs.

If the descriptor asks for a local notification, the engine then writes the
queue's consumed-descriptor count to `local_notify_base + 8*queue`. The host
polls that word to recycle its descriptor slots.

On the receive side, it writes each packet to `addr` in host memory. If the
packet was intact, it hands the header to the resequencer. Remote
notifications requested by the resequencer are written to
`remote_notify_addr` as a running count.

Arbitration works per packet:

- pending notification writes go first;
- after that, receive and transmit take turns.

A transfer starts only if its VOQ can take a maximum-size transfer
(`dest_ready`).

**VOQs (`voq_block`).** There are 8 virtual output queues of 1024 x 64 bits
(8 KB) each, one per destination, so a congested destination does not block
the others. The block has two parts:

- The sorter writes each transfer into the VOQ of its flow.
- The packet processor picks an eligible VOQ, round robin.

A VOQ is eligible when its next packet is fully stored *and* the link that
packet will take has credit for it. Each packet is at most 64 words of 64
bits (512 bytes). It gets its own header:

- size in 32-bit words;
- the address advanced by the bytes already sent;
- interrupt and notification bits only on the transfer's last packet.

Every packet is therefore a self-contained remote write.

**Multipath (`multipath_tx`).** Each destination's packets go to the four
links in strict rotation. The stage stamps `reseq = {node, path, seq}`,
where `seq` counts per destination and per path (5 bits, wrapping). It
tells the VOQ block which link each destination's next packet will use
(`path_next`). The VOQ can then check that link's credit before committing.

**Credits on the NIC's links.**

- Transmit side: one `qfc_tx_credit` per link, with 8 flows (one per
  destination). Each flow is checked against the 2 KB crosspoint buffer it
  lands in.
- Receive side: each link has its own 256 x 64-bit reception queue, a quarter
  of 8 KB. Its `credit_scheduler` returns single-lane credits as words leave.

**Resequencer (`resequencer`).** Headers of intact packets are queued per
source and per path (depth 8 each). For each source, the next header is
taken from the path it expects next, which follows the same rotation as the
sender. This restores the send order. Released headers are discarded, except:

- a header with the interrupt bit pulses `irq`;
- a header with the notification bit requests a notification write.

A notification is thus never delivered before all earlier packets from the
same source have been written. A sequence number that does not match the
expected one is counted (`seq_error`) and accepted. Loss *recovery* is not
implemented.

**Registers (`nic_csr`).** Byte addresses of the 64-bit registers:

| address | contents |
|---------|----------|
| 0x0000-0x3FFF | descriptor window: queue = addr[13:11], slot = addr[10:4], word = addr[3] |
| 0x4000 | local notification base |
| 0x4008 | remote notification address |
| 0x4010 | node number (3 bits) |
| 0x4100 + 8i | 32-bit event counter i, for i = 0..11 |
| 0x4200 + 8q | consumed-descriptor count of queue q |

The events, in counter order, are:

0. transfer sent
1. packet received
2. bad packet
3. local notification
4. remote notification
5. interrupt
6. sequence error
7. header CRC error
8. packet sent on a link
9. credit parity error
10. header released
11. credit sent

Writes take effect on the next clock. Read data is valid one clock after
`tgt_rd_en`.

## Switch (`bxbar_switch`)

An N x N combined input-crosspoint queued switch that works directly on
variable-size packets, with a 32-bit datapath. Each input port works as
follows:

- Its `link_rx` writes a packet into crosspoint buffer `(input, flow mod N)`.
  Each crosspoint (`xpoint_buffer`) is a 512 x 32-bit (2 KB) FIFO.
- The packet is counted only when its last word arrives intact (store and
  forward).
- A packet with a CRC error, or one that does not fit, is discarded by
  rewinding the write pointer. Credits make the second case impossible in
  normal operation.

Each output has an `output_scheduler`:

1. It picks, round robin, a crosspoint in its column that holds a whole
   packet.
2. It reads the size from the first word.
3. It waits until its single-lane credit counter for the NIC behind the port
   covers `size + 2` words.
4. It streams the packet to the port's `link_tx`.

When a packet starts to leave, the output reports its size to the
`credit_scheduler` of the input it came from. That scheduler returns credits
for flow `o` to the source over the input port's own framer, between that
port's outgoing packets.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each also has a cycle watchdog. For
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ipc_platform \
  -y rtl -y tb rtl/ipc_pkg.sv tb/tb_ipc_platform.sv
./obj_dir/Vtb_ipc_platform
```

Some testbenches use shared helpers from `tb/`:

- `tb_host_mem` is a behavioural host memory;
- `tb_crc.svh` holds reference CRCs written independently of `ipc_pkg`.

`tb_ipc_platform` runs the whole platform at its default size: 8 NICs and
four 8x8 switches, with no parameter overrides. It takes about 25k clocks
and under a second on Verilator. It does the following:

1. Seven nodes each post three descriptors to node 0. Two are held back, to
   check clustering. The third is released with interrupt, local and remote
   notification bits.
2. Node 0 sends a benchmark-mode transfer to node 5.
3. A light-load phase makes packets arrive out of order.

It checks:

- every data word and every notification word;
- interrupt counts;
- the NIC counters.

It also counts that each mechanism happened at least once:

- all four switches were used;
- an output or VOQ stalled for lack of credit;
- out-of-order arrivals were resequenced;
- clustering held descriptors back;
- benchmark mode sent zeros.

Block testbenches worth knowing about:

- `tb_bxbar_switch` puts a 4-port switch among four host models. The models
  use the real framer and deframer but do their own credit arithmetic. One
  host drains slowly, so its output stalls.
- `tb_nic_top` loops a NIC's four links back to itself.
- `tb_resequencer` delivers headers over four paths with random skew.
- `tb_wl_link_rate` feeds one default-size framer back-to-back packets and
  counts the clocks per packet. A maximum packet takes 528 clocks, so 97% of
  the line carries payload (2.42 Gb/s of 2.5 Gb/s). A minimum packet takes
  40 clocks. Each credit carried adds 2 clocks.
- `tb_wl_fanin` has three inputs of one switch output send maximum packets
  at once, as when three nodes send to one. Round robin gives each a third
  of the packets. The output is idle for only 2 clocks between packets, which
  is less than the framing bytes the link adds.

## Where this design departs from the reference platform

Not built:

- The PCI-X interfaces and the SERDES transceivers.
- The off-chip (SRAM/DRAM) extension of the VOQs and the linked-list
  manager that shares it. Each VOQ here lives wholly on chip.
- Byte-by-byte link bundling, which the reference uses only for direct
  NIC-to-NIC cables.
- Loss recovery in the resequencer.
- The cache-coherent NI study. It is described as separate future work.
- The benchmark-mode timestamps that the reference writes into packet
  payloads. Here benchmark mode only skips the host memory read.

Built differently:

- **Clocking.** The reference has several clock domains: the PCI-X side,
  and two link clock domains on the switch. There, "synchronization FIFOs"
  cost about 3 cycles each. Here everything is one clock, so those FIFOs
  are single-clock FIFOs.
- **Switch forwarding.** The reference supports cut-through in the switch,
  and its output scheduler starts deciding 3 clocks before the previous
  packet ends. This switch is store and forward. Its 2-clock decision is
  hidden behind the previous packet's CRC and framing bytes.
- **Design choices.** These are this design's own choices, since the
  reference gives no details:
  - the header field order;
  - CRC polynomials and symbol codes;
  - credit parity;
  - the reseq field layout;
  - the descriptor bit layout;
  - the register map;
  - FIFO depths;
  - the credit refresh period;
  - routing by `flow mod N`.
- **Flow count.** The reference supports 128 flow numbers. Here flows are
  host numbers, with one VOQ and one credit flow per host (8).

Limits to keep in mind when changing parameters:

- `BUF_WORDS` and crosspoint depth must stay at least 31 words above the
  largest packet (130 words).
- `VDEPTH` must be at least 513 (a maximum transfer plus its header word),
  because a transfer starts only when its VOQ has that much room
  (`dest_ready`).
- `NPATH` must be a power of two.
- `reseq` holds a 3-bit source number, so at most 8 nodes are supported
  without widening it.
