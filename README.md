# ROBIN FPGA: a read-out buffer for three detector links

A read-out buffer sits between a detector's front-end electronics and the
event-selection computers. Event fragments come in over optical read-out
links (ROLs) at a steady high rate. They must be held in memory until the
trigger system either asks for them or says they can be dropped. Requests
reach the board through PCI (from the host PC) or Gigabit Ethernet (from the
network). An embedded processor does the book-keeping: it keeps the index of
stored events and decides what to send and what to free. It touches no
fragment data. Everything that has to keep pace with the links is done by
the FPGA logic in this repository:

- storing fragments in a paged buffer memory;
- collecting PCI request messages;
- receiving Ethernet frames into a packet ring;
- sending response data out over PCI or Ethernet by DMA.

`robin_top` is that FPGA. It has:

- three independent ROL channels, each with its own 64 MB buffer;
- a PCI message memory and descriptor queue;
- a PCI DMA engine and a GbE DMA engine;
- a Gigabit Ethernet MAC with a receive ring in a 512 kB SRAM;
- a decoder for the processor's external bus.

The external chips are ports of the top. These are the SerDes, buffer
SDRAMs, network SRAM, PCI bridge, PHY and processor.

## Data flow in one channel

```
 link chars -> slink_rx -> data FIFO (256) -> input_handler -> buffer_arbiter -> buffer memory
                               ^                |    ^   |          ^  ^  ^
                  frag_generator (emulation)    |   FPF  UPF        |  |  CPU path
                                                |  (1024)(256)   PCI DMA  GbE DMA
```

**Pages, not fragments.** The buffer of each channel is cut into pages of
2^`page_log2` 32-bit words. `page_log2` can be 8 to 15, so a page is 1 kB
to 128 kB; it resets to 9 (2 kB).

The processor hands out free pages by writing page numbers into the
1024-entry **free page FIFO**. A page's start address is
`page_num << page_log2`, so a 16-bit page number covers the 24-bit word
address of 64 MB with 1 kB pages.

For every page it fills, the input handler writes a four-word record into
the 256-entry **used page FIFO**:

| word | content |
|------|---------|
| 0 | `{page number[31:16], words in this page[15:0]}` |
| 1 | L1ID (event number) |
| 2 | status bits |
| 3 | run number |

The status bits are: first page, last page, control error, truncated,
length mismatch, bad header marker, L1ID missing, CRC appended and link
error. They are bits 0 to 8, defined in `robin_pkg`. The link error bit
reports transmission trouble. The link receiver marks the word that follows
a damaged character pair. The handler then sets the bit in the record of
that page and of every later page of the fragment.

The processor reads the records, files the L1ID in its index and later puts
the page numbers back into the FPF. If a fragment is larger than a page, it
simply takes more pages. Each page has its own record, and only the first is
marked *first*. This scheme is what makes the hardware simple. The FPGA
never has to look anything up and never frees memory; it only consumes page
numbers and produces records.

**Fragment format.** A fragment on the link is:

1. a begin-of-fragment control word (`0xB0F0xxxx`);
2. a header: marker `0xEE1234EE`, total length in words, run number, L1ID;
3. the payload;
4. an end-of-fragment control word (`0xE0F0xxxx`).

The control word codes and the header layout are choices of this design.
Only a few header fields matter to the hardware.

**Checks, never drops.** The handler counts the words it stores and compares
the count with the header's length word when the fragment ends. It also
checks the marker and that an L1ID arrived. It runs a CRC-32 (IEEE 802.3)
over every stored word and writes the result as one extra word after the
fragment. That word counts in the last page's length and sets the *CRC
appended* bit. Faulty fragments are stored like good ones, with their
faults in the status word. Whether to keep or drop them is software's
decision.

Edge cases:

- If a new begin word arrives before the end word, the open fragment is
  closed as *truncated*.
- If the FPF is empty, the handler waits and holds off the data FIFO. When
  that FIFO fills up past 224 of its 256 words, XOFF is raised towards the
  link.
- A word that arrives while the FIFO is full is lost and flagged on
  `rol_overflow`.

## The buffer port: a fixed 1:1 time slice

Each buffer memory has a single port. `buffer_arbiter` alternates write and
read slots on every clock.

The write slot belongs to the link. The input therefore always gets half of
the memory cycles, whatever the readers do. That is the property the design
relies on to keep up with the link. If the link has nothing to write, the
processor's buffer path may take the slot.

The read slot is shared round-robin among three readers: the PCI DMA, the
GbE DMA and the processor. The memory is modelled as a synchronous port
with one-cycle read latency. The arbiter's memory side is where an SDRAM
controller would be connected; none is part of this design.

The throughput that follows is 2 bytes per clock per channel in and at most
2 bytes per clock per channel out. The design fixes no clock frequency.
The 160 MB/s of a read-out link needs at least 80 MHz.
Reaching the PCI local-bus limit of 264 MB/s from one channel would need
132 MHz.

## Requests in, responses out

**PCI messages** (`msg_dpr_if`). The host writes a request message into a
2k-word message memory. It then writes a one-word descriptor (offset and
length) into a 32-entry FIFO. On the local bus, writes with address bit 11
clear go to the memory and writes with bit 11 set go to the FIFO. The
processor polls the FIFO and reads the message. Descriptors that arrive
while the FIFO is full are counted as lost.

**Ethernet receive** (`gbe_rx_mac`, `gbe_rx_buffer`).

- The MAC strips preamble and SFD, checks the FCS residue and strips the
  FCS. A frame is good only with a correct FCS, no `rx_er` and at least 64
  bytes.
- Frames are packed into words in the SRAM ring. Every frame starts on a
  word boundary.
- A good frame leaves a descriptor `{bytes[31:17], word offset[16:0]}` in a
  32-entry FIFO.
- A bad frame, or one that does not fit in the ring or finds the FIFO full,
  is dropped. The write pointer is rewound to the frame's start, and the
  drop is counted.
- Ring space comes back when the processor writes its read pointer.
- A flow-control request is raised while 24 or more descriptors are queued
  or the ring is at least 3/4 full. The transmit MAC then sends an IEEE
  802.3x PAUSE frame with quanta 0xFFFF. When the request clears, it sends
  one with quanta 0. The two thresholds and the PAUSE format are choices of
  this design.

**Responses by DMA** (`dma_engine`, two instances). The processor writes a
descriptor and the response header words into a 512-word DMA FIFO. The
descriptor layout is this design's own:

| word | bits | content |
|------|------|---------|
| 0 | [9:0] | header words |
| 0 | [17:16] | ROL |
| 0 | [20] | odd16 |
| 1 | [24:0] | buffer words |
| 2 | [23:0] | buffer word offset |
| 3 | | PCI destination byte address (PCI engine only) |

The engine sends the header words straight from the FIFO, one per clock.
It then reads the buffer words through the selected channel's arbiter, one
per read slot. The next read is issued while the current word waits at the
output, so a 100-word fragment takes about 200 cycles. Several responses
can be queued back to back.

For Ethernet, *odd16* ends the header on a 16-bit boundary: the last header
word carries only its low half (keep mask `0011`). This lets the software
build a header whose length is not a multiple of four bytes. The GbE engine
feeds `gbe_tx_mac`. That MAC stores each frame completely before sending it
(a GMII frame cannot pause halfway), packs the bytes, pads to 60 bytes and
appends the FCS.

A fragment spread over several pages is sent with one descriptor per page;
only the first descriptor carries header words. The engine does not follow
page chains itself.

## Emulation and self-test

`frag_generator` produces complete fragments in the link format:

- a configurable length (minimum 4 words);
- a run number;
- an L1ID that counts up from a loaded start value;
- payload word *i* equal to L1ID + *i*.

Per channel, a control bit switches the channel's input from the link to
the generator. The processor can also write and read any buffer word
through the arbiter. This is the buffer path at `0x07000`-`0x07002`; it
competes with the DMA engines for read slots.

## Processor bus map

`cpu_if` decodes a 20-bit word address. A request is a one-cycle `cpu_req`
strobe, and `cpu_ack` marks the cycle in which read data are valid. The
full map is in the header comment of `rtl/cpu_if.sv`. In short:

| address | what |
|---------|------|
| `0x00000`-`0x007FF` | message memory |
| `0x01000`-`0x01001` | message descriptor FIFO: head/pop, status |
| `0x02000 + 0x10*c` | FPF write and count, UPF record words at +4 to +7, pop at +8, fragment count at +9 |
| `0x03000`-`0x03003` | page size, emulation enables, generator settings |
| `0x04000` | PCI DMA FIFO |
| `0x05000` | GbE DMA FIFO |
| `0x06000`-`0x06003` | Ethernet descriptors, read pointer, occupancy, drops |
| `0x07000`-`0x07002` | buffer path |
| `0x80000`-up | SRAM window |

## Link receiver

`slink_rx` is a simplified receiver. It pairs the 16-bit characters from
the SerDes into 32-bit words, low half first, using a per-character flag to
mark control words. A word whose two halves disagree in that flag is
dropped and counted as a link error. The next word delivered carries an
error flag into the channel. Idle realigns the pairing. The XOFF request is
registered towards the link. The real link protocol's line coding,
return-channel messages and error handling are not implemented. This is the
block to replace when connecting real link hardware.

## Where this departs from the original board

- **One clock.** The link, GMII, PCI local bus and CPU bus each have their
  own clock on a real board. Here everything runs on one clock. Clock-domain
  crossing FIFOs would be needed at `slink_rx`, the MACs, `msg_dpr_if` and
  `cpu_if`.
- **Simple external interfaces.** These are all simplified:
  - the buffer memory (ideal synchronous RAM);
  - the SRAM;
  - the PCI bridge (a write strobe in, a valid/ready stream out with
    destination addresses);
  - the processor bus (request/acknowledge).
- **Sizes follow the original.** These are all the defaults:
  - 3 channels;
  - 24-bit buffer word address (64 MB);
  - 16-bit page numbers;
  - FPF 1024 and UPF 256 entries;
  - data FIFO 256 words;
  - message memory 2k words and descriptor FIFO 32;
  - DMA FIFOs 512 words;
  - SRAM ring 128k words.
- **Own choices.** The choices listed in the sections above are this
  design's own. They are not in the original:
  - the header layout and the control word codes;
  - the descriptor layouts;
  - the bus map;
  - the thresholds;
  - the CRC polynomial;
  - the PAUSE frame format.
- **Not in the FPGA.** The processor's software is not here: the event
  index, duplicate handling and garbage collection.

## Files and simulation

`rtl/`:

- `robin_pkg.sv`: types and constants.
- `sync_fifo.sv`: first-word fall-through FIFO with overflow and underflow
  assertions.
- `crc32.sv`.
- The blocks named above.
- `robin_top.sv`.

Each `tb/tb_<block>.sv` is a self-checking testbench. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_util_pkg.sv` holds
bit-serial reference CRCs.

`tb_robin_top` runs the whole design at its default sizes, with behavioural
memories for the three buffers and the SRAM. It drives three links, and
lets software-like tasks hand out pages, read records, send PCI and
Ethernet requests and check every returned word. It also counts these
mechanisms and fails if any never happened:

- XOFF;
- a handler stall on an empty FPF;
- multi-page fragments;
- length errors;
- PCI and GbE responses;
- odd16;
- PAUSE on and off;
- emulation;
- the CPU buffer path;
- a link error.

It runs about 12,500 clock cycles in well under a second.

`tb_workload_fragsizes` runs one channel at full size with fragments of
100 to 1000 words. First the link offers a word every second clock while a
reader takes every read slot. All 16,560 link words are stored in 33,212
clocks, without a single XOFF. Then the link sends as fast as it can: 5,510
stored words take 11,072 clocks. Each fragment is rebuilt from its pages and
compared word by word, CRC included.

To run one testbench with plain Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_robin_top \
    rtl/robin_pkg.sv $(ls rtl/*.sv | grep -v robin_pkg) \
    tb/tb_util_pkg.sv tb/tb_robin_top.sv
./obj_dir/Vtb_robin_top
```

Put `robin_pkg.sv` (and `tb_util_pkg.sv`) first. Verilator warns about
unused bits and the asynchronous reset in the assertions; these warnings
are harmless.
