# P-HAL node: a packet-routing abstraction layer for FPGA software radio

A software-radio application is a set of processing objects (filters, decoders,
waveform generators, ...) that exchange streams of samples. For such an application to
run on any mix of boards and processors, no object may know where its neighbours
live. This RTL gives an FPGA the same abstraction a software platform gets from a
hardware abstraction layer. Every object has an identifier, much like a network
address. Its output samples are packed into packets for a destination identifier,
and a small network on each FPGA routes those packets on the board, to another FPGA
or over a backplane bus to another board. The object's kernel sees only a sample
stream and a parameter bus.

One instance of `phal_node` is the support logic of one FPGA that hosts one
object. Around the kernel it places:

| port | block | what it connects |
|------|-------|------------------|
| 0 | `phal_object_if` | the algorithm kernel: sample streams in/out and a parameter bus |
| 1 | `phal_ibus_if` | a shared high-speed bus to other boards (master and slave) |
| 2 | `phal_local_if` | a point-to-point link to a neighbouring FPGA |
| 3 | `phal_ram_if` | the board SRAM, reached with read/write packets |
| – | `phal_switch` + `rr_arbiter` | four-port packet switch, round-robin per output |
| – | `phal_route_table` | 16 entries: object id → port (+ next-hop board address) |
| – | `phal_ctrl` | runs control packets addressed to the node itself |
| – | `phal_timing` | divides time into slots; slot number loadable for synchronisation |

Every interface has a 64-byte (16 × 32-bit words) buffer in each direction. Each
port moves at most one 32-bit word per clock in each direction, i.e. 4 bytes per
clock.

The cost of this abstraction is buffering (every interface needs packet buffers that
a pure streaming design does not) and a clock faster than the sample rate (so that
headers and idle gaps fit). The RTL keeps both visible: buffer depth is one
parameter (`BUF_BYTES`), and every packet adds exactly one header word.

## Packets

All traffic is packets of 32-bit words. Each word carries a `last` flag beside its
data (`pkt_word_t` in `phal_pkg`), so links and the switch find packet ends without
counting. The first word is the header (`pkt_hdr_t`):

| bits | field | meaning |
|------|-------|---------|
| 31:24 | `dst` | destination object (or node) identifier |
| 23:16 | `src` | sender identifier; replies go back to it |
| 15:12 | `kind` | `pkt_kind_e`, see below |
| 11:8 | – | reserved, zero |
| 7:0 | `len` | payload words after the header |

| kind | sent to | payload |
|------|---------|---------|
| `PK_DATA` | object | samples, one per word |
| `PK_PARAM_WR` | object | `{addr[31:24], value[23:0]}` per word |
| `PK_PARAM_RD` | object | `{addr[31:24], –}`; the answer is a `PK_PARAM_RSP` with `{addr, value}` |
| `PK_ROUTE_CFG` | node | one `route_cfg_t` per word: `{valid, –, idx, link, port, obj_id, –}` |
| `PK_TIME_SYNC` | node | slot number to load |
| `PK_OBJ_CFG` | node | `obj_cfg_t`: `{pkt_len, dst_id, own_id, –}` |
| `PK_RAM_WR` | RAM | start address, then data words |
| `PK_RAM_RD` | RAM | start address, word count N; the answer is a `PK_RAM_RSP` with N words |

Identifiers are 8 bits wide. Node identifiers and object identifiers share that
space. A node learns its own identifier (`node_id`) and its bus address
(`board_addr`) from input pins.

## How a packet crosses the switch

This is the part that takes the most care to read in `phal_switch.sv`.

1. **Routing (1 clock).** When a header reaches the head of an input buffer, the
   input looks up `dst` in the routing table. The table compares all 16 entries in
   parallel, one comparator set per input, and the lowest matching index wins. There
   are three outcomes. If `dst == node_id`, the packet goes to a fifth, internal
   output that feeds `phal_ctrl`. If an entry matches and names a port 0–3, the
   packet goes to that port. Otherwise (no entry, or a port number above 3) the
   input reads the packet out and discards it, and `drop_evt[input]` pulses once.
2. **Arbitration (1 clock).** Each of the five outputs has a round-robin arbiter
   over the four inputs. A free output grants one waiting input and latches that
   entry's next-hop address (`out_link`, used only by the IBUS port).
3. **Forwarding.** From the header to the `last` word, the granted input owns the
   output (wormhole switching). Its words pass combinationally, one per clock, with
   valid/ready back-pressure from the destination buffer. The output is released on
   the `last` word, and the next header may be granted in the following clock.

So an idle switch adds two clocks of latency per packet. Under load, a packet
waits at its input while another input holds its output. The switch itself stores
nothing: waiting happens in the 64-byte interface buffers. This is where the
buffering cost of the abstraction sits. One consequence of wormhole switching: a
packet longer than the downstream buffer holds the output until the far side drains
it.

## Object interface: the kernel's view

`phal_object_if` is the API an algorithm kernel sees.

- **Sending.** Samples on `obj_in_*` wait in a 16-word buffer. When `pkt_len`
  samples wait, they leave as one `PK_DATA` packet to `dst_id` with source
  `own_id`. At a slot tick with samples waiting, the waiting samples leave as a
  shorter packet. If a packet is already going out, the tick is remembered. So a
  slow stream still moves at least once per slot. Keep `pkt_len` at most 16: the
  buffer never holds more than 16 samples, so a larger value sends only on slot
  ticks.
- **Receiving.** `PK_DATA` payload comes out on `obj_out_*` in order.
  `PK_PARAM_WR` words become `obj_par_we` strobes. A `PK_PARAM_RD` presents the
  address on `obj_par_raddr`, and the kernel must answer on `obj_par_rdata` in the
  same clock (combinationally). The value goes back to the requester in a one-word
  `PK_PARAM_RSP`. While one read reply is pending, a second read request waits in
  the buffer. Other kinds are read out and ignored.
- Replies are sent between data packets, never inside one.

`own_id`, `dst_id` and `pkt_len` come from `phal_ctrl`, so a remote manager sets up
a virtual circuit in two steps. A `PK_ROUTE_CFG` to each node on the path sets the
routes, and a `PK_OBJ_CFG` to the source node sets its destination. After reset
`pkt_len` is 8, the identifiers are 0 and the routing table is empty. Until
configured, a node discards everything except control packets.

## Inter-board bus (IBUS) and local link

`phal_ibus_if` is both a bus master and a bus slave, and the bus arbiter is
external.

- **Master.** Once a word is waiting to transmit, `m_req` rises. After `m_gnt`, the
  packet goes out one word per clock. Each word carries `m_addr`, the next-hop board
  from the routing entry, and moves when the addressed slave answers `m_ready`.
- **Bursts.** If another packet has already started to arrive in the buffer when a
  packet ends, it follows in the same grant, up to `BURST_PKTS` (4) packets. Then
  `m_req` drops for at least one clock. Sending everything that waited in one
  access lets a small buffer ride out a long bus access latency. Releasing the bus
  after every packet cannot keep up: with a 10 µs access latency and 8-sample
  packets, a 1 Msample/s stream would fall behind.
- **Grant rule.** The arbiter must keep `m_gnt` high while `m_req` is high. An
  assertion checks this.
- **Slave.** The slave side accepts words whose `s_addr` equals `board_addr` and
  drives `s_ready` only for them.

`phal_local_if` is two buffers with valid/ready on both sides. It gives no other
guarantee: the far end must respect `ready`.

## RAM interface

`phal_ram_if` turns `PK_RAM_WR` and `PK_RAM_RD` packets into accesses to a
synchronous SRAM with one clock of read latency (`sram_en`, `sram_we`,
`sram_addr`, `sram_wdata`, `sram_rdata`).

- **Writes.** One word per clock, to consecutive addresses.
- **Reads.** They are pipelined at one word per clock. A read is issued only while
  the reply buffer has room for the word in flight, so a read longer than the buffer
  simply follows the speed of the network.
- **Replies.** A reply goes to the command's `src`, and its source field is the
  identifier the command was sent to. A zero-length read gives a header-only reply.
  Addresses wrap at `2^SRAM_AW`.

## Time slots

`phal_timing` counts `SLOT_CYCLES` clocks per slot. `slot_tick` is high in the
first clock of every slot, and `slot_num` counts slots. A `PK_TIME_SYNC` packet
restarts the current slot at phase 0 with the given number, one clock after the
control block reads it. Sending the same synchronisation to every node aligns their
slots to within the packet delivery skew. The slot tick also drives the partial
packet flush described above.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `BUF_BYTES` | 64 | buffer per interface and direction (16 words) |
| `RT_ENTRIES` | 16 | routing table entries |
| `SLOT_CYCLES` | 1024 | clocks per time slot (a choice of this design) |
| `SRAM_AW` | 18 | SRAM word-address width (a choice of this design) |

`phal_ibus_if` also takes `BURST_PKTS` (default 4), the most packets sent in one bus
grant. This is a choice of this design. `phal_node` uses the default.

The switch is fixed at four ports in `phal_node`, because the port numbers are
wired to the four interfaces. `phal_switch` itself takes `NPORTS`.

## What follows the original P-HAL platform and what does not

Taken from the platform description:

- the set of blocks: IBUS master/slave, local interface, object interface, RAM
  interface, four-interface packet switch, arbitration and control, a 16-entry
  routing table and a timing block;
- 64-byte buffers on each interface;
- 32-bit interfaces with a peak of 4 bytes per clock;
- identifier-based routing;
- monitoring and control of object parameters;
- time slots with synchronisation between platforms;
- configuration of virtual connections.

The following are this design's own choices, since the platform description names
these blocks and their purpose but not how they work:

- the packet header and kinds;
- wormhole switching and round-robin arbitration;
- associative lookup in the routing table;
- dropping of packets that have no route;
- the control packet formats;
- the IBUS request/grant/ready signalling;
- the local link signalling;
- the SRAM timing;
- the slot length;
- flushing a partial packet at a slot tick.

Known departures and limits:

- **One local interface.** The example platform shows two ad-hoc links to other
  FPGAs, but its resource table lists one local interface and a four-interface
  switch. This node follows the table. A second link needs a five-port switch
  (`phal_switch #(.NPORTS(5))`) and a fifth interface instance.
- **One object per node.** Hosting several objects on one FPGA would take one more
  object interface per object, plus more switch ports. That is not built.
- **Buffer size per direction.** The 64 bytes are taken as per direction; the
  source figure does not say whether both directions share them.
- **Identifier space.** With 8-bit identifiers, at most 256 objects and nodes
  together can be addressed. That is enough for a terminal of about a dozen
  objects. It is not enough for a 16-user base station mapped one object per FPGA,
  which would need about 164 objects plus about 98 node identifiers, i.e. 262. Such
  a system needs `ID_W = 9` and a wider header field.
- **No error handling.** A packet whose `len` disagrees with its `last` flag is
  handled by the `last` flag everywhere except in the object interface's packet
  builder, which always produces consistent packets. There is no CRC, no time-out
  and no retransmission.
- **No clock-domain crossings.** Everything runs on one clock. The IBUS and the
  local link are assumed synchronous to it.

## Simulating

Every module has a self-checking testbench in `tb/` that ends with one
`TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/phal_pkg.sv tb/tb_phal_node.sv --top-module tb_phal_node -o sim
./obj_dir/sim
```

Replace `tb_phal_node` with any other testbench:

- `tb_phal_fifo`
- `tb_rr_arbiter`
- `tb_phal_route_table`
- `tb_phal_timing`
- `tb_phal_switch`
- `tb_phal_ctrl`
- `tb_phal_object_if`
- `tb_phal_ibus_if`
- `tb_phal_local_if`
- `tb_phal_ram_if`

Each testbench stops itself with a failure if a watchdog expires.

`tb_phal_fir_stream` is a workload test at default parameters. A filter object
produces 1 Msample/s on a 25 MHz node, so the 32-bit port peaks at 100 Mbyte/s.
The bus grants only 10 µs after each request. The test checks four things:

- the filter is never held off;
- every sample arrives in order;
- every grant paid the full latency;
- the two 64-byte buffers on the path are never both full.

At most 21 words waited at once.

`tb_phal_node` runs the whole node at its default parameters, in a few seconds.
Its test models are:

- a kernel;
- a remote board on the IBUS;
- a neighbouring FPGA on the local link;
- an SRAM.

In order, the test:

1. configures the node with control packets;
2. streams samples out over the IBUS;
3. lets a slot tick flush a partial packet;
4. delivers remote data to the kernel;
5. writes and reads parameters;
6. writes and reads the SRAM;
7. forwards packets between the link and the bus;
8. drops a packet that has no route;
9. stalls the link while two replies compete for it;
10. reroutes an object from the bus to the link and streams 64 samples.

It counts every mechanism and fails if any of them never happened. Output packets
are matched as whole packets, so the order between different sources does not
matter. Within one source, order is checked.
