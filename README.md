# IP packet segmentation and reassembly for a cell-switched router port

Crossbar schedulers in high-capacity routers work on fixed-size cells, but
IP packets have any length. This RTL sits on layer 3 of one router port and
does both conversions:

* **input side** — check the IPv4 header, cut each good packet into
  fixed-length cells that carry a small header, and hand the cells to the
  crossbar scheduler;
* **output side** — take cells arriving from the crossbar (interleaved from
  many input ports and two priority classes), keep them in a cell buffer,
  notice when a packet is complete, and stream complete packets back out to
  layer 2 without cell headers or padding, high priority first.

The design follows the segmentation and reassembly architecture of
"FPGA Implementation of IP Packet Segmentation and Reassembly in Internet
Router". Block structure, signal names, the cell header and the cell lengths
come from there; the interfaces between blocks, widths the paper leaves open,
and several mechanisms it only names are choices made here. They are listed
in [Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## The cell

A cell is `L` bits (default 256; 512 and 1024 are also supported). `L`
counts the whole cell, so a cell carries `PB = (L-16)/8` packet bytes
(30, 62 or 126).

| bits            | field        | meaning                                                   |
|-----------------|--------------|-----------------------------------------------------------|
| `L-1 : 16`      | payload      | packet bytes, first byte in the most significant byte; the last cell of a packet is zero-padded |
| `15 : 11`       | ToS          | class of service (upper 5 bits of the IP ToS byte), same in every cell of a packet |
| `10 : 1`        | Port ID      | input port that built the cell (up to 1024 ports)         |
| `0`             | End          | 1 in the last cell of the packet                          |

The header is what makes reassembly possible without help from the
scheduler: Port ID and ToS together identify which packet a cell belongs to,
even when cells of different packets arrive in consecutive time slots, and
End tells the output side that a packet is complete. The packet's length is
not in the cell header: it is read from the IPv4 Total Length field, which
sits in bytes 2–3 of the first cell's payload. This is why the padding of
the last cell never reaches layer 2.

Two priority classes are reassembled. A cell is high priority when the top
bit of its 5-bit ToS is set (`sar_pkg::is_high_prio`).

## Input side

```
layer 2 ─► ip_header_check ─► segmentation ─► (scheduler) ─► cell_buffer ─► (crossbar)
                  │                                  AW / AR
                  └─► destination address, ToS (to the lookup function)
```

**`ip_header_check`** queues incoming bytes while it checks the header as
it streams past: version 4, IHL ≥ 5, total length ≥ header length, a
correct header checksum, and a packet that does not end inside its header.
Once the header has been seen, a verdict is queued; the output side then
either forwards the whole packet or discards it. The first byte leaves
`IHL*4 + 1` clocks after it arrived; after that one byte per clock. Each
forwarded packet pulses `dst_valid` with its destination address and ToS,
each rejected one pulses `pkt_dropped`.

**`segmentation`** is a cell register plus a byte-write controller. Bytes
(`valid_ip_packet_byte` with `byte_en`, `first_byte`, `last_byte`) are
written into the payload until it is full or the packet ends. The finished
cell, with header, is copied to the output register `unscheduled_cell` and
`get_cell` pulses for one clock, one clock after the completing byte. The
ToS is captured from packet byte 1 while the first cell is filled. One byte
per clock is accepted without stalls, so a packet of N bytes yields
`ceil(N/PB)` cells.

**`cell_buffer`** is a dual-port memory of 64 cells through which the
scheduler passes scheduled cells to the crossbar: write at `aw`, read at
`ar`, read data one clock later.

## Output side

```
(crossbar) ─► cell_manager ─► external cell buffer ─► reassembly ─► layer 2
                   │                                      ▲
                   └─► completed-packet lists (HP, LP) ───┘
```

### Buffer organisation: circular blocks

The output cell buffer (external memory, outside this RTL) is divided into
one circular block per (priority class, input port): 2 × 1024 blocks of
`2**SLOT_W` cells. A cell's buffer address, in cell units, is

```
{ high_priority (1 bit), port_id (10 bits), slot (SLOT_W bits) }
```

With `SLOT_W = 7` and 256-bit cells this is 2¹⁸ cells = 8 MB. Because each
(port, class) pair writes its own block in sequence, all cells of a packet
lie in consecutive slots (modulo wrap-around), however the crossbar
interleaves cells from different ports. Reading a packet back therefore needs
only its start address and an incrementer.

**`cell_manager`** keeps, per block, the next free slot, whether a packet is
open and the slot of its first cell. Each arriving cell is written at
`{class, port, next slot}`; a cell with End set pushes its packet's start
address onto the completed-packet list of its class. One cell per clock,
outputs one clock later. The per-block table is a 2048-entry memory that is
cleared after reset, one entry per clock; `ready` (top: `out_ready`) is low
for those 2048 clocks and no cell may arrive meanwhile.

**Completed-packet lists** are two `sync_fifo`s of start addresses (CPHP
for high, CPLP for low priority), first-word-fall-through, so packets of one
class are served in completion order.

### Reassembly

Three parts, connected as follows:

| part | job |
|------|-----|
| `selector` | on `next_packet`, pops the high-priority list if it is not empty, otherwise the low-priority list; `lists_empty` when both are empty |
| `address_generator` | takes the popped start address and reads the first cell; each `read_next_cell` reads the next slot, wrapping inside the block |
| `cell_header_stripping` | drops the header, counts out exactly Total Length bytes to layer 2 with `ip_packet_start` / `ip_packet_end`, and paces the reads |

The pacing is the subtle part. Layer 2 must see the bytes of a packet on
consecutive clocks, but the buffer answers a read only after some latency.
`cell_header_stripping` therefore keeps one cell in its output shift
register and one in a prefetch register:

1. When the first cell arrives it loads the byte counter from the IP Total
   Length and, if the packet is longer than one cell, immediately pulses
   `read_next_cell`.
2. Bytes leave one per clock from the shift register. The cell that was
   asked for waits in the prefetch register.
3. In the clock in which the last byte of the current cell goes out, the
   prefetched cell is taken over, and if the packet still has bytes in
   cells not yet read, the next `read_next_cell` is pulsed.

So at most one read is outstanding, and no byte gap occurs as long as the
buffer answers within `PB - 2` clocks (28 at L = 256). If it is slower, the
output simply pauses until the cell arrives.

When the last byte leaves, `next_packet` is raised in the same clock if a
completed packet waits; if both lists are empty the block idles and raises
`next_packet` only once `lists_empty` falls. Between two packets there is a
gap of a few clocks more than the buffer read latency.

### Buffer interface

The reassembly block issues `buf_rd_req` with `buf_raddr`; whatever sits in
front of the memory must return exactly one `buf_rdata_valid` per request,
in order. Any latency works; see above for the gap-free bound. Writes
(`buf_we`, `buf_waddr`, `buf_wdata`) come one clock after the cell arrives
from the crossbar and are never held back.

## Top level: `sar_router_top`

The two sides share only clock and reset. Blocks that surround this design
in a router appear as ports:

| port group | direction | connects to |
|------------|-----------|-------------|
| `port_id` | in | constant: this port's position in the router |
| `l2_in_valid/first/last/byte` | in | layer 2, received packets |
| `dst_valid`, `dst_addr`, `ip_tos`, `pkt_dropped` | out | lookup function / statistics |
| `unscheduled_cell`, `get_cell` | out | scheduler |
| `sched_we/aw`, `scheduled_cell`, `sched_re/ar` | in | scheduler's access to the input cell buffer |
| `cell_to_crossbar`, `cell_to_crossbar_valid` | out | crossbar |
| `xbar_cell`, `xbar_cell_valid` | in | crossbar (cells for this output port) |
| `buf_we/waddr/wdata`, `buf_rd_req/raddr`, `buf_rdata/_valid` | out/in | external cell buffer and its memory controller |
| `ip_packet`, `ip_packet_valid/start/end` | out | layer 2, reassembled packets |
| `list_full`, `out_ready` | out | status |

Parameters: `L` (cell bits, 256), `SLOT_W` (log2 cells per circular block,
7), `IN_BUF_DEPTH` (input cell buffer, 64), `LIST_DEPTH` (entries per
completed-packet list, 256). For L = 512 or 1024 with an 8 MB buffer use
`SLOT_W` = 6 or 5.

All flip-flops reset asynchronously on `rst_n` low. Assertions flag a FIFO
overrun or underrun, a header-check byte queue overrun, a cell arriving at
`cell_manager` before its table is cleared, and a cell arriving at
`cell_header_stripping` when it did not ask for one.

## Where this design makes its own choices

* **Cell length** is taken to include the 16-bit header. The reported
  register counts of the original implementation (about 2·L) fit a cell
  register of L bits plus an output register; bytes would not fit.
* **Header bit order** (payload high, End in bit 0) and **byte order**
  (first byte most significant) are choices; only the field order and widths
  are given.
* **ToS mapping**: the 8-bit IP ToS becomes the 5-bit cell ToS by taking its
  upper five bits, and the top bit of those decides the priority class.
* **Header check**: which checks are made, the queue-then-decide structure,
  and the queue depths (128 bytes, 8 verdicts) are choices; the source only
  says the header is inspected for errors and bad packets are rejected. The
  Total Length is trusted to match the bytes layer 2 delivers.
* **Buffer block size** (128 cells) is derived from the 8 MB buffer used in
  the original hardware test. There is **no protection against a block
  being overrun**: a port/class that gets more than `2**SLOT_W` cells ahead
  of reassembly overwrites its oldest cells. Flow control for this must come
  from the scheduler.
* **Same-class interleaving**: the cell manager assumes that cells of two
  packets from the same input port and class never interleave (the input
  port segments one packet at a time, and the crossbar keeps a port's cells
  of one class in order).
* **Handshakes** (`byte_en`, `sel_valid/sel_hp`, `rd_req`/`cell_valid`,
  `ready`) and the input cell buffer depth are this design's.
* **Layer 2** on the output side is assumed never to stall; there is no
  back-pressure input.
* The lookup function and table, the scheduler, the crossbar, the external
  SDRAM and its controller are not included.

For reference, the original FPGA implementation (Cyclone II) reported for
segmentation 588 / 1215 / 3404 logic elements and 218.8 / 193.2 /
162.3 MHz, and for reassembly 783 / 1465 / 2838 logic elements and
189.6 / 174.1 / 157.1 MHz, at L = 256 / 512 / 1024. This RTL has not been
through FPGA implementation, so those numbers are not claims about it.

## Files

| file | contents |
|------|----------|
| `rtl/sar_pkg.sv` | header field widths, header struct, ToS helpers |
| `rtl/ip_header_check.sv`, `rtl/segmentation.sv`, `rtl/cell_buffer.sv` | input side |
| `rtl/cell_manager.sv`, `rtl/sync_fifo.sv` | output side storage and completed-packet lists |
| `rtl/selector.sv`, `rtl/address_generator.sv`, `rtl/cell_header_stripping.sv`, `rtl/reassembly.sv` | reassembly |
| `rtl/sar_router_top.sv` | both sides of one port |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_sar_router_top.sv` | end-to-end test at default parameters |
| `tb/tb_sar_cell_lengths.sv`, `tb/sar_e2e_harness.sv` | end-to-end test at L = 256, 512 and 1024 |
| `tb/tb_pkt_pkg.sv` | packet generator with correct IPv4 checksums |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run with a failure. Packages go first on the command
line:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_sar_router_top \
    rtl/sar_pkg.sv tb/tb_pkt_pkg.sv rtl/*.sv tb/tb_sar_router_top.sv
./obj_dir/Vtb_sar_router_top
```

For a single block list just its files, e.g.
`rtl/sar_pkg.sv tb/tb_pkt_pkg.sv rtl/cell_header_stripping.sv tb/tb_cell_header_stripping.sv`.
`tb_reassembly` also needs `sync_fifo`, `selector` and `address_generator`;
`tb_ip_header_check` needs `sync_fifo`.

What the tests cover:

* block tests check outputs against models written independently of the
  RTL, including cycle timing where it is defined (cell one clock after its
  last byte, header-check latency `IHL*4+1`, read address one clock after
  the request, no byte gap inside a packet);
* the end-to-end test sends good and corrupted packets through the input
  side, loops the cells through scheduler and crossbar models into the
  output side together with cells of three other ports, and checks that
  every good packet comes out once and intact. It also requires that each
  mechanism occurred at least once: header rejection, single- and multi-cell
  packets, padding, interleaved ports, block wrap-around, high priority
  taken while low priority waits, idling on empty lists, and prefetching.
