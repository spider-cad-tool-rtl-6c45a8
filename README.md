# A network-on-chip IP for three bus-based processor clusters

This is a small packet-switched network-on-chip (NoC). It links processor
clusters on an FPGA. Each cluster is a processor with its own memory on a
local bus. The clusters reach each other only through the network. A processor
can write to another cluster's memory, read from it, and send messages to
another processor. The network carries two classes of traffic:

* **Guaranteed traffic (GT)** is sent only in time slots reserved for it in a
  time-division multiplexing (TDM) table. This bounds its latency and
  bandwidth.
* **Best-effort traffic (BE)** uses whatever capacity is left.
* **BE with priority** is an optional third class. It has no reserved slots
  but rides the GT virtual channel between them. So it overtakes plain BE in
  every router. The example configuration does not use it.

The two classes travel on separate virtual channels. In every router GT has
priority and freezes BE, so a blocked BE message cannot hold up guaranteed
traffic.

The structure follows the NoC architecture published with the μSpider NoC
generator (S. Evain, R. Dafali, J.-Ph. Diguet, Y. Eustache, E. Juin, "μSpider
CAD tool: case study of NoC IP generation for FPGA"). In that flow a tool
sizes the TDM tables, allocates paths and FIFO depths, and emits VHDL. Here
the network is written by hand in SystemVerilog for one fixed example
configuration. Section "Departures and limits" lists what differs from the
published design.

## The system

```
  CPU0  MEM0          CPU1  MEM1          CPU2  MEM2
    |     |             |     |             |     |
  WRs0  WRm0          WRs1  WRm1          WRs2  WRm2
    |     |             |     |             |     |
    +-NI0-+             +-NI1-+             +-NI2-+
       |                   |                   |
   router 0 (0,0) ---- router 1 (1,0)          |
       |                   |                   |
   router 2 (0,1) ---- router 3 (1,1)          |
       |_______________________________________|
```

* **Slave wrapper (WRs, `wrapper_slave`)**: the processor side. It is a bus
  slave that maps the NI channels into registers: a status word, per-channel
  data ports, and an interrupt.
* **Master wrapper (WRm, `wrapper_master`)**: the memory side. It is a bus
  master. It executes the write and read commands that arrive over the network
  against the cluster's memory, and sends read data back.
* **Network interface (NI, `noc_ni`)**: holds the channel FIFOs of one
  cluster. It turns outgoing words into packets, schedules them by class, and
  sorts arriving flits back into channels.
* **Router (`noc_router`)**: three ports: the local NI, the neighbour in the
  same row, and the neighbour in the same column. Four routers form a 2x2
  mesh (`noc_mesh`). Node 3 has no cluster.
* **`noc_ip`** is the top: the mesh plus the six wrappers. The processors,
  memories, bus arbiters and interrupt controller are not part of it. Their
  connections are the top's ports:
  * `s_req`/`s_rsp` and `irq`: towards each processor;
  * `m_req`/`m_rsp`: towards each memory controller.

Everything runs on one clock `clk`, with a synchronous active-high reset `rst`.

## How software uses it

### Registers of a slave wrapper

Slave wrapper k answers at `SLAVE_BASE + k*0x1000`, with
`SLAVE_BASE = 0x8000_0000`.

| offset       | name     | access     | meaning |
|--------------|----------|------------|---------|
| 0x000        | STATUS   | read       | 4 bits per channel c. Bit 4c: outgoing FIFO not full. 4c+1: outgoing almost full. 4c+2: incoming not empty. 4c+3: incoming almost empty. |
| 0x004        | IRQ_EN   | read/write | one interrupt-enable bit per channel |
| 0x008        | IRQ_PEND | read       | enabled channels whose incoming FIFO holds data |
| 0x00C        | ERROR    | read, clears | bit c: a write to full channel c was dropped. Bit 16+c: a read of empty channel c returned 0. |
| 0x100 + 4c   | DATA[c]  | read/write | a write pushes into outgoing FIFO c; a read pops incoming FIFO c |

Every access is acknowledged on the cycle after `select` is seen. The wrapper
never stalls the bus waiting for the network:

* a write to a full channel is dropped and flagged in ERROR;
* a read of an empty channel returns 0 and is flagged in ERROR.

Software is expected to check STATUS first. The interrupt is a level: the OR
of `IRQ_PEND`. It suits a processor that runs several tasks. A single-task
processor can instead poll STATUS.

### Channels of the example configuration

Every NI has six channels. Channels 0–3 belong to the slave wrapper and
channels 4–5 to the master wrapper. Below, n+1 and n+2 are taken modulo 3.

| channel | class | words go to | use |
|---------|-------|-------------|-----|
| 0 | GT    | master wrapper of node n+1 (its ch4) | access to the memory of cluster n+1; read data come back into ch0 |
| 1 | BE    | slave wrapper of node n+2 (its ch2)  | messages to processor n+2 |
| 2 | BE    | slave wrapper of node n+1 (its ch1)  | messages to processor n+1 |
| 3 | intra | master wrapper of the same node (ch5) | access to the cluster's own memory; read data come back into ch3 |
| 4 | GT    | slave wrapper of node n+2 (its ch0)  | the master wrapper's replies to remote reads |
| 5 | intra | slave wrapper of the same node (ch3) | the master wrapper's replies to local reads |

The routes, the classes and the TDM table are constants in `noc_cfg_pkg`.
The TDM table has four slots that alternate between ch0 and ch4. In the
original flow these constants come out of a slot- and path-allocation tool.
The classes and the table can also be overridden per build through the
`GT_MASK`, `PRIO_MASK` and `SLOTS` parameters of `noc_ip`. Routes are changed
in the package.

### The three transactions

A command to a master wrapper is a sequence of words written to one channel:

```
command word : [31:28] opcode (1 = write, 2 = read), [15:0] word count n
address      : byte address of the first word (+4 per further word)
data         : n words, for a write only
```

* **Remote write.** Poll STATUS, then write `{write, n}`, the address and n
  data words to DATA[0]. The master wrapper of cluster n+1 performs n bus
  writes. No acknowledge comes back.
* **Remote read.** A processor must not hold its bus while a remote memory
  answers, so a read is done as a write of a request:
  1. Write `{read, n}` and the address to DATA[0].
  2. The remote master wrapper performs n bus reads and sends the words back
     on its channel 4.
  3. The words arrive in incoming FIFO 0 and raise the interrupt, if enabled.
  4. The processor then reads STATUS and DATA[0].
* **Message passing.** Write words to DATA[1] or DATA[2]. They arrive in the
  other processor's incoming FIFO 2 or 1 and raise its interrupt.
* **Own memory.** The same command format on DATA[3] goes through the
  intra-NI channel to the cluster's own master wrapper. It never enters the
  network.

Commands on different channels of one master wrapper are served round-robin,
one whole command at a time. The master wrapper drops an unknown opcode after
its address word.

Inside, the master wrapper has two state machines joined by two four-word
FIFOs. The network-side machine reads the command word and the address and
hands the job to the bus-side machine. It then moves the data words: for a
write, from the channel into the write FIFO; for a read, from the read FIFO
back into the channel. The bus-side machine performs one bus access per word.
It takes write data from the write FIFO and puts read data into the read
FIFO. So a long write reaches the bus before all its data has arrived. A read
keeps the bus busy even while the network is slow to take the replies.

## Inside the network interface

This is the part where the timing matters, so it is described in full.

### Channel FIFOs

Each channel has an outgoing FIFO, written through the NI bus, and an incoming
FIFO, read through the NI bus. The NI bus carries one write strobe, one read
strobe, one data word and four flags per channel: not full, almost full, not
empty, almost empty. These flags are exactly what the wrappers show in STATUS.
All FIFOs are `chan_fifo`:

* first-word-fall-through, 8 words deep by default;
* almost full at 2 free entries or fewer;
* almost empty at 1 word or fewer.

### Packets

A packet is a header flit followed by 1 to `MAX_PKT` (4) payload flits. A flit
is 34 bits: `head`, `tail` and a 32-bit data word. The header data word
contains:

* `dst_x`, `dst_y` (2 bits each): the destination node;
* `dst_ch` (4 bits): the incoming channel at that node;
* `len` (8 bits): the number of payload flits;
* `credit` (1 bit, above `dst_x`): marks a credit packet, a single flit
  that is both head and tail, where `dst_ch` names the sending channel and
  `len` the credits returned.

The upper 15 bits are unused and sent as zero. When a packet starts, its
length is the smallest of the channel's fill level, `MAX_PKT` and (with
credits on) the channel's credits. No other unit removes words from an outgoing FIFO, so a packet
never runs dry once it has started.

### Slot counter, TDM table and the two packetizers

A slot counter divides time into `TDM_SIZE` (4) slots of `SLOT_LEN` cycles.
`SLOT_LEN` defaults to `MAX_PKT + 1`: a full packet, header included. The NI
holds two packetizers that share the network port:

* **GT packetizer.** On the first cycle of a slot, if the table gives the slot
  to a GT channel that holds data, a packet of that channel starts. The header
  leaves on the next cycle, on virtual channel 0. A GT channel with no data in
  its slot waits for its next slot. A slot marked free in the table is not used
  for GT.
* **BE packetizer.** Whenever it is idle, it picks the next non-empty BE
  channel in round-robin order and sends a packet on virtual channel 1.
* **Priority BE.** Channels marked in `CH_PRIO` also use the GT packetizer
  and virtual channel 0, but own no slot. They are served round-robin
  whenever that packetizer is idle and no slot owner is starting. A priority
  packet starts only if, at one flit per cycle, it finishes by the start of
  the next slot. The exception is a next slot that is free in the table. This
  keeps reserved slots clear.

A packetizer sending its tail flit may start the next packet in the same
cycle. So a full-length GT packet does not cost the next slot's owner its
start.

Each cycle the network port carries at most one flit. A GT flit always wins
it, so a BE packet is interleaved flit by flit around GT packets. Since
packets on different virtual channels are kept apart all the way, this is
safe.

### Depacketizer

The router delivers at most one flit per cycle. For each virtual channel the
depacketizer remembers the channel named by the last header, and writes the
payload flits into that incoming FIFO until the tail. The NI's ready for a
virtual channel goes low only while a packet on it is pending for a full
incoming FIFO. Without end-to-end credits, that back-pressure runs back
through the routers to the sender, and can hold up other traffic on the same
virtual channel.

### End-to-end credits

With `E2E` set (the default for the three-cluster network), every network
channel runs credit-based flow control on top of the link handshake:

* The sender holds `DEPTH` credits per channel, the size of the receiving
  FIFO. A packet starts with no more words than the channel has credits, and
  spends them.
* The receiver counts the words the wrapper reads from each incoming FIFO.
  Once `CR_BATCH` (default `MAX_PKT`) have built up, it sends them back as a
  one-flit credit packet. The header's `credit` bit is set, `len` is the
  number of credits, and it is addressed to the feeding node and channel
  (`CH_SRC_*`).
* Credit packets travel on virtual channel 1. They go ahead of BE data in the
  BE packetizer.

An incoming FIFO therefore never overflows, and the network never waits on a
receiver. A processor that stops reading only stalls the channels that feed
it. The batch size is capped at `DEPTH`, so a sender out of credits always
gets them back once its receiver has read everything. A receiver may hold up
to `CR_BATCH - 1` credits until more words are read.

### Intra-NI channels

A channel marked in `CH_INTRA` moves one word per cycle from its outgoing
FIFO straight into the incoming FIFO given by its route. There are no packets
and no scheduling. If a network flit writes the same incoming FIFO in the same
cycle, the network flit wins.

## Inside the router

Each input port sorts flits by their virtual-channel bit into one of two
4-flit FIFOs. The head flit at the front of a FIFO is routed in dimension
order: first along X to the right column, then along Y.

Each output port has one arbiter per virtual channel. A free arbiter grants
one requesting input in round-robin order. It then keeps the output for that
input until the tail flit has passed (wormhole switching). Per cycle an output
sends one flit:

1. the virtual-channel 0 (GT) packet, if it has a flit and the downstream
   GT buffer has room;
2. otherwise the virtual-channel 1 (BE) packet.

So GT traffic freezes the BE arbiter, and BE uses only the cycles that GT
leaves unused.

Link flow control is a local handshake. Each virtual channel has a `ready`
signal meaning "input FIFO not full", a registered condition. A sender raises
`valid` only in a cycle where `ready` of the flit's virtual channel is high,
and the flit is taken at the next clock edge. Assertions in the router and the
NI check this rule.

## Timing

| path | cycles |
|------|--------|
| slave wrapper register access | 2 (select seen, then `xfer_ack` one cycle) |
| router: head flit in FIFO to head flit on output | 2; body flits follow one per cycle |
| NI: GT packet start | first cycle of its slot; header on the network on the next cycle |
| lone GT word written to NI 0 until readable at NI 1 (one hop) | 9 in simulation; bounded by one TDM round (20 cycles) plus the path |
| master wrapper bus access | select held until the one-cycle `xfer_ack`, dropped the next cycle |

The theoretical link rate is 32 bits per cycle. With 4-flit payloads, one flit
in five is a header, so payload bandwidth is 80 % of a link.

## Departures and limits

* **Bus.** The wrappers use a simplified point-to-point request/acknowledge
  record (`opb_req_t`/`opb_rsp_t`: `select`, `rnw`, `addr`, `wdata` /
  `xfer_ack`, `rdata`). It is modelled on the IBM CoreConnect OPB but is not a
  full OPB interface: there is no arbitration, byte enables, retry or timeout.
* **Configuration.** One network layout is built: three clusters on a 2x2
  mesh of 3-port routers, two virtual channels (GT and BE) and six channels
  per NI with fixed routes. The published results also cover GT-only and
  BE-only networks. Those are reachable by the `GT_MASK` and `SLOTS` parameters of
  `noc_ip`/`noc_mesh`. `tracking_tb` runs the GT-only variant. The
  two-BE-class network ("BE with priority" next to plain BE) is reachable by
  setting `PRIO_MASK` instead of `GT_MASK`. `noc_mesh_tb` runs one priority
  channel next to GT and plain BE. The published results also cover 4-port
  routers, which are not built.
* **TDM allocation.** The TDM allocation is a plain example. It is not
  computed to be free of contention between NIs. GT packets of different NIs
  may meet in a router, where they are arbitrated round-robin, so the latency
  bound of a real allocation is not guaranteed here.
* **Chosen details.** The following are this design's choices, not taken from
  the published design: the packet format, the command-word format, the
  register map, the FIFO and buffer depths, the round-robin and XY policies,
  the rule that a GT packet starts only at a slot boundary, and the rule that
  keeps priority BE out of reserved slots.
* **Flow control.** End-to-end credits on top of a link handshake are the
  published option. The credit packet format, the batching of returns and
  the sending of credits on the BE virtual channel are this design's own.
* **Master wrapper.** The two state machines and the two FIFOs follow the
  published structure. The FIFO depth (four words) and the command word layout
  are this design's own. The wrapper has no bus-slave configuration port.
* **Software.** The C API and hardware abstraction layer of the original flow
  are not included.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends a hung run with a
failure. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/noc_pkg.sv rtl/noc_cfg_pkg.sv tb/noc_ip_tb.sv --top-module noc_ip_tb
./obj_dir/Vnoc_ip_tb
```

| testbench | what it shows |
|-----------|---------------|
| `chan_fifo_tb` | 2000 random cycles against a queue model: head word, count, all four flags, writes when full and reads when empty ignored |
| `noc_router_tb` | three inputs send random packets on both virtual channels under random back-pressure. Checks XY routes, in-order and unbroken packets, every packet delivered once, the 2-cycle head latency, and that GT froze BE |
| `noc_ni_tb` | NI with its network port looped back. Checks delivery and order per channel, header contents, the right VC per class, each GT header in its own TDM slot, every slot used by its owner when it has data, priority BE on VC 0 kept clear of reserved slots, BE interleaved with GT, end-to-end credits (never more in flight than the receiving FIFO holds, every word credited back, no back-pressure from the receiving side), a full outgoing FIFO, and intra-NI words kept off the network |
| `noc_mesh_tb` | all 18 channels of the three NIs at once. Credits are off here, so the link back-pressure path is covered. Channel 1 is switched to BE with priority and must be seen on VC 0. Checks every word on its routed channel in order, and the latency of a lone GT word |
| `wrapper_slave_tb` | register map, two-cycle access, no acknowledge outside the window, dropped writes and empty reads with their ERROR bits, interrupt enable and pending |
| `wrapper_master_tb` | random write/read/unknown commands on two channels against a memory with random latency and random reply back-pressure. Checks final memory contents, read data, and bus request stability |
| `noc_ip_tb` | the whole IP at its default parameters. Three processors run remote writes, remote reads on interrupt, local accesses through the intra-NI channel, and message passing, all at once. Then an overflow phase. It counts GT, BE and credit packets, frozen-BE cycles, full channels, dropped writes and empty reads, and fails if any of them never happened. It also fails if an NI ever refuses a flit, which credits must prevent |
| `tracking_tb` | an object-tracking application on the whole IP, see below |

`tracking_tb` runs the kind of application this network was built for: a
three-stage image pipeline. It uses a guaranteed-traffic-only network:
channels 0, 1, 2 and 4 are all GT and own one TDM slot each. Cluster 0 stands for a hard processor that loads
frames, averages each with the previous one against noise, and subtracts a
background. Cluster 1 thresholds the result at the frame mean. Cluster 2
dilates, erodes, and computes the object's pixel count and centre of gravity.
Each stage hands its output to the next by a remote write into the next
cluster's memory, then a message. The receiver is woken by its interrupt and
reads the data locally through the intra-NI channel. Each stage has two
buffers, whose release is signalled with messages. So the three processors
work on different frames at once. Frames are scaled down to 48 one-word
pixels. The test checks every stage's output in memory against a reference
model. It also checks that the computed centre follows the object across the
frames.

The whole-IP test finishes in well under a second of simulation time.
`noc_ip_tb` and `noc_mesh_tb` watch internal links through hierarchical
names, so they only build against the real `noc_ip` and `noc_mesh`.

## Files

* `rtl/noc_pkg.sv`: flit, header, link and bus types, and the command
  opcodes.
* `rtl/noc_cfg_pkg.sv`: the example configuration (routes, classes, TDM
  table).
* `rtl/chan_fifo.sv`, `rtl/noc_router.sv`, `rtl/noc_ni.sv`,
  `rtl/noc_mesh.sv`, `rtl/wrapper_slave.sv`, `rtl/wrapper_master.sv`,
  `rtl/noc_ip.sv`: the blocks described above, bottom-up.
* `tb/*_tb.sv`: one testbench per block, plus `tracking_tb.sv`, the
  application-level test.
