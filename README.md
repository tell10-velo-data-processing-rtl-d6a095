# TELL10 VELO data processing in SystemVerilog

The VELO pixel detector's front ends send their hits over 24 GBT links. Each
link carries 80 bits every 25 ns. The packets on a link arrive out of time
order and vary in length. They are also packed across word boundaries. This
design is the FPGA data path of the TELL10 readout board. It turns those
links into two streams of Multi Event Packets (MEPs) for the event-building
network.

Along the way it:

- cuts the link words back into packets;
- sorts the packets by bunch crossing;
- unpacks them into single hits tagged with their link;
- glues the fragments of one bunch crossing from all links into one event;
- buffers the events in an external DDR3 SDRAM;
- drops the events the level-0 trigger rejects;
- packs the rest, several events per packet, for the network.

The whole path runs on one 200 MHz clock. Bunch crossings come at 40 MHz, so
every stage has a budget of five clock cycles per event on average. The
design follows the TELL10 VELO data processing note for its structure, its
formats and its sizes. Where that note is silent, the choices are this
design's own. They are marked as such below and in each file's header.

## Data path

```
 GBT link i (80 b)      x 12 per half, link source id = i
   |
 gbt_splitter           small frame buffer, two 40-bit front-end streams
   |          \
 nspp_reconstruct   nspp_reconstruct     whole nSPP packets from a byte stream
   |                  |
 sync_fifo (16)     sync_fifo (16)
    \                /
      linker0                            round-robin merge of the two halves
        |
      time_reorder                       sort by bunch counter (512-event RAM)
        |
      nspp_unpack                        one 32-bit word per hit, + link id
        |
      stream_fifo (64 x 64 b)            counts complete event fragments
   ------------------------------------- link_proc ends here
 stage 1: 4 x linker_stage(3 links, 64 -> 128 b, 1-byte alignment) + stream_fifo
 stage 2: 2 x linker_stage(2 inputs, 128 -> 256 b, 2-byte alignment) + stream_fifo
 stage 3: 1 x linker_stage(2 inputs, 256 -> 256 b, 4-byte alignment)
   |
 mwp_gen                packets of 1 header + 7 data words
   |
 ddr_fifo_ctrl  <-->  external SDRAM (word port brought out)
   |
 mwp_unpack             checksum check, filler removal, event ID
   |
 l0_trigger     <---  decisions {event ID, keep}
   |
 mep_gen        --->  MEP stream (256 b, sop/eop)
   ------------------------------------- half_stream ends here
 tell10_top = 2 x half_stream (links 0-11 and 12-23)
```

The board is split into two independent halves of 12 links. Each half has
its own SDRAM port, trigger decision input and MEP output. Neither half needs
a bus wider than 256 bits.

## Stream conventions

All blocks use valid/ready handshakes. A word moves on a clock edge where both
are high. Back-pressure therefore travels from the MEP output all the way to
the GBT input (`gbt_ready`). Reset is synchronous and active high.

Between the unpacking and the MWP generator, data is a byte stream with three
fields per word:

- `nbytes` counts the valid bytes, from 0 up to the full word width.
- The bytes are left-aligned: byte 0 is in the most significant bits.
- `eoe` marks the last word of an event, and `ovf` marks an event that lost
  data.

An event without data is one word with `nbytes = 0` and `eoe = 1`. Every bunch
crossing therefore produces at least one word on every link. The later stages
count events by these `eoe` flags. Nothing downstream carries the bunch
counter.

## Packet and word formats

**nSPP packet**, as it arrives from a front end. It has these fields, first
byte first:

- bunch counter, 12 bits;
- super-pixel address, 12 bits;
- hit count − 1, 4 bits;
- *n* hit addresses of 4 bits each;
- *n* ToTs of 4 bits each;
- 4 zero bits.

That is 28 + 8*n* bits plus padding, or 4 + *n* bytes, with *n* = 1..16.
Packets follow each other on byte boundaries within a 40-bit half of the GBT
word. The 4-bit hit count alone gives the packet length, and that makes the
reconstruction cheap.

**Hit word** (32 bits, two per 64-bit word after unpacking):
`{4'b0, 3'b0, link id[4:0], super-pixel address[11:0], hit address[3:0], ToT[3:0]}`.
The hit itself is 28 bits. It is stored in a 32-bit slot so that every later
alignment (1, 2 and 4 bytes) stays natural.

**Time-reorder RAM word** (65 bits): 64 data bits and an end-of-packet bit.

**MWP (Multi Word Packet)**: 8 words of 256 bits: a header, then 7 data
slots.

- Each slot has a 32-bit info word, `{data valid 8b, flags 8b, checksum 16b}`.
  - Data valid is the byte count.
  - The flags are bit 0 end of event, bit 1 event empty, bit 2 overflow.
  - The checksum is the XOR of the sixteen 16-bit halves of the data word.
- The header holds info word *k* in bits `32k+31:32k`, and in bits 239:224
  the XOR of its fourteen 16-bit halves.
- A filler slot has an info word of zero.

**MEP**: one 32-byte header, then for each event a 16-bit byte length and the
event's bytes, then zero padding to the next 32-byte boundary.

- The header is `{first event ID 32b, MEP length 24b, MEP factor 8b, zeros}`.
- The MEP length counts the event records: 2 + length for each event.
- The records are packed on 2-byte boundaries, with no gap between events.
- An event that was kept but is empty is a length of zero and nothing else.

## Time reordering (`time_reorder`)

This is the block that needs the most care.

Each link has a data RAM of `EV_DEPTH` × `EV_WORDS` 65-bit words: 512 slots of
8 words, 266,240 bits. A packet goes to slot `BCnt mod 512`, behind the words
already stored there. A second, small RAM holds per slot the bunch counter, the
number of words used and an overflow bit (17 bits). It exists twice, one copy
read by the write side and one by the read side. Both RAMs have a two-cycle
read, as block RAM with registered address and output has. A flip-flop per
slot says whether the slot was written since it was last read. So a slot never
written, or left over from 512 crossings earlier, reads as empty without
clearing the RAM.

**Write side**, per packet:

- cycle 0: accept the packet and read the slot's length;
- cycle 1: wait;
- cycles 2 onwards: write the 1–3 words;
- one more cycle: update the length.

That is 3 + words cycles, 4 to 6 per packet. A packet that does not fit in the
8 words left in its slot is dropped, and the event is marked as overflowed.

**Read side.** Events leave strictly in bunch-counter order, starting with
bunch counter 0 after reset. Each event takes:

- one cycle to start;
- one cycle to wait for the length;
- one cycle per word, or one cycle to emit a single "empty" word when nothing
  was stored.

Words pass through a 16-entry output FIFO. The read side starts the next event
in three cases:

- the newest bunch counter written is more than `DELAY = EV_DEPTH − MARGIN`
  (496) crossings ahead;
- a packet waiting at the input is `DELAY` or more crossings ahead;
- `flush` is high, which drains everything up to the newest bunch counter.

The second rule matters when the bunch counter jumps forward over empty
crossings. Without it, the packets arriving after the jump would land in slots
still waiting to be read.

**Window.** Each packet's bunch counter is compared with the next crossing to
be read (`d_in`):

- A packet inside the window is written.
- A packet `DELAY` or more ahead waits at the input. This stalls that link
  until the read side has moved on.
- A packet behind the read pointer is *late*: its event has already left, and
  the packet is dropped.

`drop_cnt` counts overflow drops and late drops together. The bunch counter
wraps at 4096. Distances of 2048 or more are taken as "behind".

## Linking and byte padding

A `linker` reads one event from each of its inputs in turn: input 0 first,
then input 1, and so on. It starts only when every input FIFO holds at least
one complete event fragment. The `stream_fifo` counts complete fragments by
their `eoe` flags. Only the last fragment keeps its `eoe`, and the overflow
flags of all fragments are ORed. Link order is kept throughout, so within an
event the hits of link 0 come first.

The `padder` behind each linker packs the valid bytes of consecutive words
next to each other in a wider word:

1. It rounds each word's byte count up to the stage's alignment (1, 2 or 4
   bytes).
2. It shifts the bytes in behind those already collected.
3. It sends a full output word as soon as there is more than a word's worth.
4. At the end of an event it sends the partial word, padded with zeros.

A word that is exactly full is held until the next input word, so that the
end-of-event flag always sits on a word with data. If an event ends with more
than a full word collected, the remainder leaves in an extra cycle, during
which the input is stalled. Hits are 4 bytes, so the alignment of the later
stages never inserts padding inside an event here. Coarser alignment only
makes the shifters smaller.

## SDRAM buffer

`mwp_gen` has two banks of 7 slots. One fills while the other is sent, so the
input pauses one cycle in eight: the 12.5 % header overhead. `flush` closes a
partly filled bank with filler slots.

`ddr_fifo_ctrl` treats the SDRAM as a circular buffer of `2^ADDR_W` words.
With the default of 2^27 words of 32 bytes, that is 4 GB per half. It always
moves whole 8-word packets:

- A write burst starts when its 128-word input FIFO holds a packet and the
  buffer is not full.
- A read burst starts when a packet is stored and the 64-word output FIFO has
  room for it, counting the reads still in flight.
- When both are possible, writes and reads alternate.

The memory port carries one command per cycle:

- `mem_addr`, `mem_write` / `mem_read` and `mem_wdata`;
- the command is held while `mem_waitreq` is high;
- read data returns in order with `mem_rvalid`, after any latency.

The DDR3 controller/PHY itself is outside this design.

`mwp_unpack` works on the packets read back:

- It checks the header checksum and each data word's checksum. It counts
  mismatches in `hdr_err` / `data_err` and passes the data on anyway.
- It drops filler slots.
- It gives every word a 32-bit event ID. The ID counts end-of-event flags from
  0 after reset. It is the same number as the bunch crossing index, because
  every crossing yields exactly one event.

## Level-0 trigger

Decisions `{event ID, keep}` enter a 33-bit × 4096 FIFO. At the first word of
each event, `l0_trigger` looks at the head decision:

- **Same ID:** the keep bit applies, and the decision is used up.
- **Older ID:** the decision is stale. It is discarded and counted, and the
  next decision is examined.
- **Newer ID:** the event has no decision of its own. It is kept and counted.
- **FIFO empty:** the event waits.

Kept events pass word by word without a register. Rejected events are read
and discarded. The counters are `kept_cnt`, `rej_cnt`, `stale_cnt` and
`nodec_cnt`.

## MEP assembly

`mep_gen` stores incoming events in a 1024-word FIFO. As each event enters,
its length is summed and queued. After every `MEP_FACTOR` events a descriptor
{first event ID, MEP length} is queued. Once a descriptor is ready, the output
side sends the pieces of the MEP through a 256-bit padder with 2-byte
alignment:

1. the header;
2. for each event, its 2-byte length and then its words.

The output marks the header word with `mep_sop` and the last word with
`mep_eop`. It carries no byte counts.

A MEP leaves only when all of its events are stored. So the buffer must hold
`MEP_FACTOR` of the largest events:

- a link's event is at most 8 RAM words, which unpack to 48 hits or 192 bytes;
- 12 links then make about 75 words;
- 8 events make about 600 words;
- so the buffer has 1024 words.

## Parameters (defaults)

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `EV_DEPTH` | 512 | top, half, link, reorder | events in the reorder RAM |
| `EV_WORDS` | 8 | link, reorder | 64-bit words per event and link |
| `MARGIN` | 16 | top, half, link, reorder | reorder delay = `EV_DEPTH − MARGIN` |
| `ADDR_W` | 27 | top, half, SDRAM FIFO | SDRAM word address width (4 GB) |
| `DEC_DEPTH` | 4096 | top, half, trigger | decision FIFO depth |
| `MEP_FACTOR` | 8 | top, half, MEP | events per MEP |
| `WORDS` | 7 | MWP gen/unpack | data words per MWP |

The MEP factor is this design's choice. The source fixes the other values.

## Top-level interface (`tell10_top`)

Port arrays are indexed by link (0..23) or by half (0, 1).

- `gbt_dv[i][1:0]`, `gbt_frame[i][79:0]`, `gbt_ready[i]` carry the GBT data
  word of link *i*.
  - `gbt_dv[i][1]` validates bits 79:40 and `gbt_dv[i][0]` bits 39:0.
  - A frame is taken when `gbt_ready[i]` is high and either bit is set.
  - At the real link rate this is one frame in five cycles.
- `flush` drains the reorder buffers and closes the last MWP at the end of a
  run.
- `mem_*[h]` is the SDRAM word port of half *h* (see above).
- `dec_valid/dec_ready/dec_evid/dec_keep[h]` carry the level-0 decisions.
- `mep_valid/mep_ready/mep_data/mep_sop/mep_eop[h]` carry the MEP stream.
- The status outputs are `drop_cnt[i]` per link, and per half `hdr_err`,
  `data_err`, `kept_cnt`, `rej_cnt`, `stale_cnt` and `nodec_cnt`.

The GBT receivers, the SDRAM devices with their controllers, and the
Ethernet/IP framing of the MEPs are outside this module.

Coarse synthesis with yosys at the defaults gives for `tell10_top`:

- about 22,000 word-level cells;
- 48,800 flip-flop bits;
- 8.17 Mbit of memory.

Most of the memory is the 24 reorder RAMs (6.4 Mbit). That is 38 % of the
21.2 Mbit of a Stratix IV EP4SGX530, the FPGA the design was planned for.

## Departures from the source and known limits

- **Throughput of the reordering.** Writing a packet takes 4–6 cycles, and
  reading an event takes 2 + words cycles (3 at least; the source plans 1 +
  words, at least 4). So one link keeps up with about one short packet per
  bunch crossing within the 5-cycle budget. Denser crossings are absorbed by
  the 512-event buffer and by back-pressure on the link, not at full rate.
  The note gives no average occupancy to check this against.
- **Reorder window.** The delay is 512 − 16 = 496 events. (The note's
  arithmetic prints 498.) The rules that push the read side on, the late
  drops and `flush` are this design's.
- **Per-half data-valid bits** on the GBT input, and one clock domain. The
  crossing from the 40 MHz link clock is not modelled.
- **ToT correction** is named in the source but not specified, and it is not
  implemented.
- **MWP checksum** function (XOR of 16-bit halves), info-word bit positions
  and filler slots are this design's choices. So are the flags field layout
  and the 8-bit data valid. (The source gives both 6 and 8 bits for data
  valid; 8 is used.)
- **MEP padder alignment** is 2 bytes, not the 4 listed for it. The MEP
  format packs 16-bit length fields back to back, which 4-byte pieces cannot
  do. The MEP length counts the event records only.
- **MEP buffer** is 1024 words instead of about 128, for the reason given
  above.
- **Missing or stale trigger decisions** are handled as described above. The
  source does not say what should happen.
- **Not included:** the GBT receivers, the DDR3 PHY/controller, the Ethernet
  framer, and the clustering alternative that the source abandoned.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The stimulus is random (`$urandom`), and each
testbench has a watchdog. Build and run any of them with plain Verilator, for
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tell10_pkg.sv tb/tb_tell10_top.sv \
          --top-module tb_tell10_top -j 8
./obj_dir/Vtb_tell10_top +verilator+rand+reset+2
```

Shared testbench code:

- `tb/tell10_stim.svh` generates each link's two front-end byte streams, with
  the hits every bunch crossing must yield. The traffic includes:
  - packets out of time order;
  - empty crossings;
  - crossings that overflow their slot, where the model knows which packets
    are lost;
  - a packet so late that it must be dropped.
- `tb/mep_check.svh` rebuilds every MEP byte by byte. It checks the header,
  the event lengths, the hit sets of the kept events, the link order inside an
  event and the zero padding.
- `tb/ddr3_model.sv` models the SDRAM with latency and random wait states.

`tb_link_proc` and `tb_half_stream` run the same traffic through one link and
through one half, with a 32-event reorder buffer to keep them short.
`tb_tell10_top` runs the full board at the default parameters. It covers 24
links and 600 bunch crossings, with the read side advancing on its own past
496 events. It takes about 15 s in Verilator. It makes every mechanism occur
at least once and counts each:

- packets out of order, empty crossings, overflow and late drops;
- frames refused by back-pressure;
- MWP filler slots and SDRAM wait cycles;
- rejected, stale and missing decisions;
- MEPs, MEP padding and output back-pressure.

The other testbenches cover single blocks:

- `tb_gbt_splitter`, `tb_nspp_reconstruct`, `tb_sync_fifo`, `tb_linker0`;
- `tb_time_reorder` (write timing, out-of-order packets, overflow, late
  packets, flush);
- `tb_nspp_unpack`, `tb_stream_fifo`, `tb_linker`;
- `tb_padder` (four width/alignment configurations), `tb_linker_stage`;
- `tb_mwp_gen`, `tb_ddr_fifo_ctrl`, `tb_mwp_unpack`, `tb_l0_trigger`,
  `tb_mep_gen`.

Concurrent assertions in the RTL check the FIFO, padder, reorder and SDRAM
port rules during simulation. `--assert` enables them.
