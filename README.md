# Two-level URL filter: hardware first stage for 10/100 Gb Ethernet

Legal URL filtering has to look at every packet crossing an ISP edge link.
Inspecting the HTTP request of every packet at 10 or 100 Gb/s is expensive,
but almost no traffic goes to a forbidden site. This design therefore
splits the job in two.

* **Hardware level (this RTL).** It checks only the destination IPv4
  address of each frame against a blacklist. Frames whose address might be
  listed are called *suspicious* and go to the host by DMA. Every other
  frame goes straight on to the other side of the link.
* **Software level (the host).** It does the deep packet inspection. It
  decides from the requested URL whether a suspicious frame is blocked. If
  not, it sends the frame back out through the board.

The blacklist is not stored as addresses. It is a bitmap indexed by a hash
of the address: CRC-32 of the four address bytes, of which the low 26 bits
are kept. The bitmap has 2^26 bits (64 Mb) and lives in an external QDR-II
SRAM. QDR-II is used because it accepts a new random read every cycle.

Up to 64 addresses share one bit, so the hardware gives false positives but
never false negatives. The host resolves the false positives. Because of
the sharing, the host keeps the full address list: a bit may be cleared only
when no listed address still maps to it.

The board sits in the link with two ports. Frames received on port 0 leave
on port 1 and the other way round, so both directions are filtered. Both
directions use the same rule memory. The host can rewrite or read the rule
memory at any time without stopping traffic.

## Block structure

```
            port 0 rx                                        port 1 rx
               |                                                 |
       +-------v--------+                                +-------v--------+
       | packet_filter  |  query / result    +--------+  | packet_filter  |
       |  ip_parser     |<------------------>| packet |<>|  ip_parser     |
       |  packet FIFO   |                    |matching|  |  packet FIFO   |
       +---+--------+---+                    +---+----+  +---+--------+---+
        net|     dma|                            |read    net|     dma|
           |    dma_tx FIFO -> host              |           |    dma_tx FIFO -> host
       fwd FIFO ----------------------.     +----v-------+   |
           |                          |     | qdr_access |<--- rule_updater <- Local Bus
           |   host -> dma_rx FIFO    |     | 2x request |
           |              |           |     |  _fifo     |
           '----------.   |           |     | qdr_manager|--> memory controller (app_*)
                      v   v           v     +------------+
            port 1: tx_aggregator   port 0: tx_aggregator <- dma_rx FIFO <- host
                      |                       |
                   tx FIFO                 tx FIFO
                      |                       |
                  port 1 tx               port 0 tx
```

| Module | Role |
|---|---|
| `urlf_top` | Connects two port slices, the shared matcher, the rule updater and the memory access path. |
| `packet_filter` | Per port: frame admission, packet FIFO, IP parser; routes each frame to network or DMA. |
| `ip_parser` | Finds EtherType and destination IPv4 address in the first bus words. |
| `packet_fifo` | Frame FIFO: data word plus start, end and empty-byte count. |
| `packet_matching` | Lookups of both ports: time slots, hash, memory request, in-order result return. |
| `crc32_hash` | Combinational CRC-32 of an IPv4 address, low `HASH_W` bits. |
| `qdr_access` | One `request_fifo` per requester plus `qdr_manager`. |
| `request_fifo` | Crosses requests to the memory clock and read answers back; splits read and write channels. |
| `async_fifo` | Gray-pointer dual-clock FIFO used by `request_fifo`. |
| `qdr_manager` | Round-robin choice between requesters; drives the controller; routes read answers. |
| `rule_updater` | Host word writes and reads from the Local Bus; limits reads in flight. |
| `tx_aggregator` | Merges forwarded frames and host frames onto one port, whole frames only. |
| `sync_fifo` | Small single-clock FIFO (queries, results, tags, owner queue). |
| `urlf_pkg` | Widths, frame offsets and the memory request struct. |

Not part of the RTL, and appearing only as ports of `urlf_top`:

* the Ethernet MACs;
* the PCIe DMA engine and the Local Bus bridge;
* the QDR-II memory controller;
* the SRAM itself;
* the host software.

`tb/qdr2_mem_model.sv` models the memory together with the user side of
its controller.

## Life of a frame

The timing below is for the default configuration: a 128-bit bus at
125 MHz and a 250 MHz memory clock.

1. **Admission.** The receive stream has no back-pressure, as in a real
   MAC. At each start of frame, `packet_filter` takes the frame only if two
   things hold:
   * its packet FIFO has room for a maximum-size frame (1518 bytes, i.e.
     95 words);
   * the query FIFO of its port has at least two free places.

   Otherwise the whole frame is dropped and counted in `frames_dropped`. A
   frame is never cut.
2. **Parsing.** Words are written into the packet FIFO as they arrive.
   `ip_parser` watches the same words. It picks out:
   * bytes 12-13, the EtherType;
   * bytes 30-33, the destination address.

   Here the address ends in the third word, and the query goes out one
   cycle after that word. On a 256-bit bus the address ends in the second
   word. A frame shorter than 34 bytes gives a non-IPv4 query at its last
   word.
3. **Lookup.** `packet_matching` keeps a small query FIFO per port. It
   issues lookups in fixed time slots: even cycles for port 0, odd cycles
   for port 1. A slot whose port has nothing to ask stays unused.

   An issued query is hashed in the same cycle. Hash bits 25:5 form the
   memory word address, sent as a read request. Hash bits 4:0, the port
   number and the IPv4 flag go into a tag FIFO.

   The memory answers in request order. Each answer pops one tag, selects
   the bit and pushes a result into that port's result FIFO. The result is
   suspicious when the bit is 1 and the frame is IPv4.

   Non-IPv4 frames are looked up too, and their result is forced to
   "clean". Results therefore stay in frame order with a single path.
4. **Forwarding.** At the head of the packet FIFO, a frame waits for its
   result, then leaves cut-through:
   * suspicious frames go to the `dma_tx` FIFO of their port, towards the
     host;
   * clean frames go to the `fwd` FIFO, towards the other port.

   On the other port, `tx_aggregator` merges the `fwd` stream with frames
   the host sends to that port (`dma_rx` FIFO). It takes whole frames and
   alternates between the two when both wait. Its output goes through the
   `tx` FIFO to the MAC.

In the end-to-end simulation the lookup takes 9 system cycles, from query
to result in the result FIFO. An isolated 64-byte frame takes 21 cycles
from its first word in to its last word out. The 512-word packet FIFO
covers this delay many times over: at line rate the lookup delay holds
fewer than 15 words in the FIFO.

## Sharing one rule memory

This is the part that needs the most care. There are two readers: the
lookups of both ports. There is one writer and reader: the host. They sit
in two clock domains, and none of them may stall the frame path.

**Time slots between the ports.** Each port owns every other system cycle.
Each port therefore gets exactly half of the lookup bandwidth, whatever
the other port does, and neither can starve the other. With a 128-bit bus
a minimum-size frame takes 4 cycles but gets 2 slots, so there is ample
slack. With a 256-bit bus it takes 2 cycles and gets 1 slot, which is
exactly enough.

**Credits instead of back-pressure.** A lookup is issued only when its
port has a free place reserved in its result FIFO. A credit is taken at
issue and returned when the filter takes the result. Memory answers can
therefore always be stored. Nothing on the memory return path ever has to
wait, which matches a memory that cannot be paused.

**Requesters and clock crossing (`qdr_access`).** The matcher and the
rule updater each have their own `request_fifo`. A request is
`{we, 21-bit word address, 32-bit data}` (`urlf_pkg::mem_req_t`). It
crosses into the memory clock through an `async_fifo`. In the memory clock
domain, the head request is offered on either the read channel or the
write channel, matching a controller with separate read and write command
strobes and "full" flags.

Read answers cross back through a second `async_fifo`. The matcher sends
reads only. The updater sends both.

**Arbitration (`qdr_manager`).**
* Among the requesters whose command the controller can take now, it
  picks one round-robin and registers the command towards the controller.
  One command per memory cycle is sustained.
* For each read it pushes the requester number into an owner queue.
* Each read answer pops that queue and raises the valid strobe of the
  requester that asked. The data bus is shared.

The memory runs at twice the system clock, and lookups use at most one
request per system cycle. About half of the memory command slots are
therefore left for rule updates, so updates never cost a lookup slot.

**Rule updates (`rule_updater`).** The host writes whole 32-bit words.
There is no read-modify-write in hardware: the host keeps a copy of the
table and sends the new word. Reads return the stored word. They serve to
check that the host copy and the hardware table agree.

At most `MAX_RD` reads are in flight, so the answer FIFO of the updater's
`request_fifo` cannot overflow. Writes and reads are answered in order.

**Order of an update against traffic.** A frame whose lookup was issued
before a write reached the memory sees the old word. The host therefore
knows a rule is active once a read-back of the word returns the new value.

## Rate and size

| Configuration | Frame rate per port | Bus / clocks | Lookup demand | Lookup capacity |
|---|---|---|---|---|
| 10 GbE (defaults) | 14.88 Mpps | 128 b, 125 MHz system / 250 MHz memory | 29.8 M/s | 62.5 M/s per port; 250 M memory commands/s |
| 100 GbE (`DATA_W=256`) | 148.8 Mpps | 256 b, ≥ 298 MHz system / ≤ 333 MHz memory | 297.6 M/s | 150 M/s per port at 300 MHz; 333 M memory commands/s |

The defaults are those of the 10 Gb/s build. 100 Gb/s needs the 256-bit
bus: at 128 bits, 149 Mpps would need a system clock near 600 MHz. Both
rows are simulated; see Verification below.

Memory use at the defaults:
* ten packet FIFOs of 128 × 512 bits, 640 Kb in all, which with
  `DATA_W=256` become 1,280 Kb;
* a few Kb for the query, result, tag and request FIFOs;
* off chip, the 2^26-bit rule table.

This RTL does not fix the target device. Whether the logic reaches 300 MHz
has not been checked.

## Interfaces of `urlf_top`

* **Frame streams.** Used by `rx_*`, `tx_*`, `dma_tx_*` and `dma_rx_*`,
  each an array of two, one per port. The fields are:
  * `valid`;
  * `data[DATA_W]`, with byte 0 of the frame in bits 7:0;
  * `sop` and `eop`;
  * `empty`, the unused bytes in the last word.

  `rx_*` has no `ready`. The other streams use valid/ready.
* **`dma_tx[p]`** carries suspicious frames received on port p.
  **`dma_rx[p]`** carries frames the host wants sent out of port p.
* **Local Bus** (`lb_*`): `lb_valid/lb_ready`, `lb_we`, a 21-bit word
  address and 32-bit write data. Read answers come back on
  `lb_rdata_valid/lb_rdata`, in order.
* **Memory controller user side** (`app_*`, memory clock):
  * `app_wr_cmd/addr/data` with `app_wr_full`;
  * `app_rd_cmd/addr` with `app_rd_full`;
  * `app_rd_valid/app_rd_data`, returned in order with any latency.
* **Counters:**
  * per port: `frames_in`, `frames_dropped`, `frames_net` and
    `frames_dma`;
  * for the design: `lookups`, `hits`, `rule_writes`, `rule_reads`;
  * per requester: `mem_grants`.
* **Clocks and resets:** `clk/rst_n` for the frame path, `mem_clk/mem_rst_n`
  for the memory side. Resets are asynchronous, active low. The two
  resets should be released together, after both clocks run.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `DATA_W` | 128 | top, filter, FIFOs, parser, aggregator | Frame bus width; 256 for 100 Gb/s |
| `PKT_FIFO_DEPTH` | 512 | top | Depth of all ten packet FIFOs |
| `MAX_FRAME_BYTES` | 1518 | top, filter | Room required before a frame is admitted |
| `HASH_W`, `MEM_AW`, `MEM_DW` | 26, 21, 32 | `urlf_pkg` | Hash width, memory word address and word width |
| `QDEPTH`, `RDEPTH`, `TAGDEPTH` | 8, 32, 32 | `packet_matching` | Query FIFO, result FIFO and lookups in flight |
| `REQ_DEPTH`, `RSP_DEPTH`, `RD_INFLT` | 16, 64, 64 | `qdr_access` | Request and answer FIFO depths, reads in the controller |
| `MAX_RD` | 16 | `rule_updater` | Host reads in flight |

Changing the hash width means changing `HASH_W`, `MEM_AW` and `BIT_W`
together in `urlf_pkg`. The relation is `HASH_W = MEM_AW + BIT_W` and
`MEM_DW = 2^BIT_W`.

## Own choices and departures

Taken from the source design:
* the two-level split;
* the block structure (filtering with parser, matcher and packet FIFO;
  rule updating; shared memory access with one request FIFO per requester
  and a manager);
* the CRC-32 hash with 26 bits kept;
* 32-bit memory requests;
* 128-bit frame words with 512-word packet FIFOs, five per port;
* the 125 / 250 MHz clocks;
* equal time slots between the ports;
* separate read and write channels with full flags towards the memory
  controller;
* the four pipeline stages of filtering, and the three steps each of rule
  updating and of the memory manager;
* the 256-bit, ≥ 298 MHz scaling for 100 Gb/s.

Chosen here, where the source is silent:
* **Framing.** Plain Ethernet II: no VLAN tag, no preamble in the stream.
  With a 128-bit bus the address is complete in the third word; the
  source puts it at "the second cycle", which holds for a 256-bit bus.
* **Bit order.** The CRC uses the reflected Ethernet form with all-ones
  start and final inversion, fed the address most significant octet
  first. The hash is packed as word address `hash[25:5]` and bit index
  `hash[4:0]`.
* **Memory size.** The rule memory is taken as 2^26 usable bits. The
  physical devices are larger because they include parity.
* **Admission.** Admission per frame, with room for a maximum frame, is
  this design's drop policy.
* **Routing.** Frames go from port to port. Host frames are merged
  through an aggregator that alternates whole frames.
* **Non-IPv4 frames.** They are forwarded, never sent to the host.
* **Flow control.** Credit-based result FIFOs; round-robin memory
  arbitration; a limit on host reads in flight.
* **Local Bus.** The bus is proprietary, so its signals here are a
  simple valid/ready request port.
* **FIFO style.** All FIFOs are written as plain arrays with first-word
  fall-through reads. A block-RAM mapping may want an output register
  added.

Not covered:
* IPv6, which the source mentions only as a possible extension;
* jumbo frames;
* VLAN-tagged frames, which are looked up as non-IPv4 and forwarded.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if
the design hangs. The expected values are computed independently in the
testbench:
* a table-driven CRC;
* queue models of the FIFOs;
* a copy of the rule memory;
* per-frame records of origin, sequence number and payload.

Some block testbenches set their block's parameters to smaller values to
reach corner cases quickly. `tb_rule_updater` uses `MAX_RD=4` and
`tb_packet_matching` uses `RDEPTH=8`.

**`tb_urlf_top`** runs the whole design at its default parameters
(125 / 250 MHz). It uses the memory model with a 6-cycle read latency and
random full flags, and a host model. It goes through:
* loading and reading back rules;
* a single frame, measuring latency (the lookup must take under 15
  cycles);
* both ports at 10 Gb/s line rate with 64-byte frames, with no drop
  allowed;
* mixed sizes, non-IPv4 frames and output back-pressure;
* host re-injection of suspicious frames;
* rules added while traffic flows;
* a blocked output, which forces drops.

It checks that every frame leaves exactly once:
* complete;
* in order at its exit;
* through the right exit;

or is counted as dropped. It also checks all counters. It counts, and
requires at least once each:
* forwarding;
* DMA;
* re-injection;
* drop;
* non-IPv4 frames;
* on-line update;
* rule read;
* both requesters at the memory in the same cycle;
* memory back-pressure.

**`tb_urlf_100g`** builds the top with `DATA_W=256` at 300 MHz, with a
333 MHz memory. It sends 20,000 back-to-back 64-byte frames into each port
(150 Mpps per port). It requires:
* no drop;
* every frame at the right exit, in order;
* 40,000 lookups;
* the output to keep pace with the input.

To run a testbench with Verilator 5 from the top of the tree:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_urlf_top rtl/urlf_pkg.sv rtl/*.sv tb/qdr2_mem_model.sv tb/tb_urlf_top.sv
./obj_dir/Vtb_urlf_top
```

Block testbenches need only the package, their module and its
sub-modules. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_packet_filter rtl/urlf_pkg.sv rtl/*.sv tb/tb_packet_filter.sv
```

The testbenches need `--timing` (delays and event controls) and
`--assert`, which enables the hand-shake and occupancy assertions inside
the RTL. `tb_urlf_top` runs in about ten seconds.
