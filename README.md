# AHB bus tracer with on-the-fly abstraction and compression

Signals on an on-chip bus are the best evidence of what a system-on-chip is
doing, yet they are buried inside the chip. This design embeds a tracer next to
an AMBA AHB 2.0 bus master: it watches every signal of the master's port,
keeps only what the current *trace mode* asks for, shrinks repeated addresses
with a dictionary, wraps each sample into a self-describing packet and stores
the packets, densely packed, in an on-chip trace memory. That memory can
then be read out through a simple stream port.

The tracer has two ideas. First, it can reduce the trace in two
dimensions:

* **timing:** one sample per clock cycle (*cycle level*) or one per
  completed transfer (*transaction level*);
* **signals:** address only, address + data, address + data + control, or
  control only.

Second, the mode can be changed *during* a trace by bus events, so one part
of a trace can be detailed and the rest cheap. Start, stop, mode changes and
the number of samples after a trigger are all set by programmable event
registers.

The structure (event generation, abstraction, dictionary compression,
packing with headers, circular trace memory, trace-out) follows the paper
*IP Core Development of AMBA AHB Bus Tracer* (IJSETR, 2012). The paper
describes what the blocks do but not how. Everything below that is more
detailed than that (packet format, register map, sizes, the bus master
itself) is this design's own choice. The section
[Relation to the paper](#relation-to-the-paper) lists these choices.

## Block diagram and pipeline

```
             HGRANT HREADY HRESP HRDATA (from arbiter / slaves)
                 |
 command --> ahb_master --> HBUSREQ HLOCK HTRANS HADDR HWRITE HSIZE HBURST HPROT HWDATA
                 |
                 | all port signals (ahb_obs_t)
                 v
 registers --> event_gen ----- trace_en, mode, stop -----+
                 |                                        |
                 v                                        v
            abstraction  (1 cycle)  --abs_rec_t-->  compression (2 cycles)
                                                          |
                                                     cmp_rec_t
                                                          v
                                                     packet_gen (1 cycle)
                                                          | pkt_t (<= 99 bits)
                                                          v
                                                     trace_buffer (bit FIFO, 1 cycle)
                                                          | 128-bit words
                                                          v
                                                     trace_memory (128 x 128, circular)
                                                          |
                                                          v
                                                     trace_out --> tout_valid/tout_data/tout_ready
```

| file | module | role |
|---|---|---|
| `rtl/tracer_pkg.sv` | package | shared types: observed signals, records, packets, header codes, register addresses |
| `rtl/ahb_master.sv` | `ahb_master` | AHB 2.0 master driven by a command port (the traffic being traced) |
| `rtl/event_gen.sv` | `event_gen` | event registers, matching circuit, start/stop/mode/depth control |
| `rtl/abstraction.sv` | `abstraction` | timing and signal abstraction |
| `rtl/compression.sv` | `compression` | 16-entry read-only address dictionary, two pipeline stages |
| `rtl/packet_gen.sv` | `packet_gen` | header generation and mode change packets |
| `rtl/trace_buffer.sv` | `trace_buffer` | packs variable-length packets into fixed-width words, flushes the tail |
| `rtl/trace_memory.sv` | `trace_memory` | FIFO over a RAM array with wrap-around (circular buffer) |
| `rtl/trace_out.sv` | `trace_out` | reads the trace memory and offers words on a valid/ready stream |
| `rtl/top_tracer.sv` | `top_tracer` | everything wired together |

All modules use one clock (`HCLK`) and an asynchronous active-low reset
(`HRESETn`).

## Trace modes

A mode is three bits, `{txn, level[1:0]}` (type `mode_t`):

| level | name | fields in a sample |
|---|---|---|
| 0 | `LVL_ADDR` | address |
| 1 | `LVL_ADDR_DATA` | address, data |
| 2 | `LVL_FULL` | address, data, control |
| 3 | `LVL_CTRL` | control |

*Control* is the 19-bit `ahb_ctrl_t`, from the most significant bit down:
`htrans[1:0] hwrite hsize[2:0] hburst[2:0] hprot[3:0] hresp[1:0] hready
hbusreq hlock hgrant`.

**Cycle level** (`txn = 0`) takes a sample every cycle while tracing. The
address is the current `HADDR`. Data is `HWDATA` if the transfer now in its
data phase is a write, else `HRDATA`. Control is the port's current values.

**Transaction level** (`txn = 1`) takes one sample per transfer, in the cycle
its data phase ends (`HREADY` high). Because AHB overlaps phases, the
abstraction stage keeps the address and control of the last accepted address
phase and joins them with the data and `HRESP` of the data phase. So an ERROR
response shows up in the control field of the failed transfer.

## Trace control: events and registers

`event_gen` is programmed through `cfg_we`/`cfg_addr`/`cfg_wdata` (one write
per cycle, no read-back):

| address | register | bits |
|---|---|---|
| 0x00 | CTRL | [0] arm (1: clear and arm; 0: stop a running trace) · [1] start on arm · [2] wrap · [5:3] initial mode · [6] compression enable |
| 0x01 | DEPTH | [15:0] samples kept after the trigger |
| 0x04 + 4k | EV_ADDR k | address to match |
| 0x05 + 4k | EV_MASK k | 1 = compare this address bit |
| 0x06 + 4k | EV_CTRL k | [0] enable · [1] match writes · [2] match reads · [4:3] action · [7:5] mode |

Actions: 0 START (begin tracing and take the event's mode), 1 STOP (the
trigger), 2 MODE (switch to the event's mode). `NUM_EVENTS` (default 2)
registers are compared in parallel against every accepted address phase:
`enable & ((HADDR ^ addr) & mask) == 0 & direction matches`. If several
events change the mode in the same cycle, the lowest-numbered one wins.

States: idle → armed (waiting for START) → tracing → post-trigger → done.
After STOP, exactly DEPTH more samples are taken, then the trace ends. DEPTH
0 ends it at once. The matching transfer itself counts as the first
post-trigger sample at transaction level, because its data phase completes
after the STOP takes effect. A hit in cycle *t* takes effect in cycle *t*+1.

**Before and after the trigger.** Use START and STOP with a depth to record
what follows an event. To record what *led to* an event, set *wrap* and
*start on arm*: the trace memory then overwrites its oldest words and, when
STOP ends the trace, holds the most recent history up to the trigger plus
DEPTH samples. Without wrap, a trace that reaches the almost-full mark of
the memory ends by itself.

## Packet format

This is what a trace analyser must understand. Packets are bit strings sent
**least significant bit first**: bit 0 of a packet is the first bit stored.
Every packet starts with an 8-bit header:

| header bits | sample packet (`[1:0] = 01`) | mode packet (`[1:0] = 10`) |
|---|---|---|
| [2] | address present | mode bits `{txn, level}` in [4:2] |
| [3] | address is a dictionary index | (part of mode) |
| [4] | data present | (part of mode) |
| [5] | control present | compression enabled |
| [6] | loss: packets were dropped just before this one | loss |
| [7] | transaction level | 0 |

A sample header is followed by its fields in this order, each only if its
header bit is set:

1. address: 4 bits (dictionary index) or 32 bits;
2. data: 32 bits;
3. control: 19 bits (`ahb_ctrl_t`, bit 0 = `hgrant`).

So a sample takes 8 to 91 bits. A mode packet is just its 8-bit header. It is
placed before the first sample of every trace and before the first sample
after any change of mode or of the compression setting. A packet with a mode
packet in front is at most 99 bits (`PKT_MAX`).

Header type `00` is **padding**: the rest of that memory word is empty. This
occurs only in the last word of a trace, which the packer fills with zeros.

Packets are packed back to back across word boundaries. Memory word *n*
holds stream bits *n*·128 … *n*·128+127, with the earliest bit in bit 0.
To decode, concatenate the words oldest first and read packets until the
stream ends or a `00` header appears. The reference decoder
`tb/trace_decode_pkg.sv` does exactly this.

A wrapped trace (see above) may start in the middle of a packet, because the
oldest words were overwritten. The `trc_overwritten` status bit says so.
Decoding then has to find a packet boundary, for example from the known
contents of the last packets or from a mode packet.

## Address dictionary

Loops make a program revisit the same addresses. `compression` holds a
read-only table of 16 addresses (parameter `DICT`; by default the word
addresses 0x00 to 0x3C). Any sample address equal to an entry is replaced
by its 4-bit index, which saves 28 bits. The table is fixed at build time:
set `DICT` to the hot addresses of the software being debugged. Stage 1
compares the address against all 16 entries; stage 2 encodes the lowest
matching entry into the index. Data and control are not compressed. CTRL[6]
switches compression off, and all addresses are then traced in full.

How much this saves depends on how often the program touches the table.
A transaction-level sample with all fields shrinks from 91 to 63 bits on a
hit. In the test program above, 48 of 66 transfers hit and the trace
is 22 % shorter. At the address-only level a hit shrinks the sample from 40
to 12 bits.

## From packets to memory words

`trace_buffer` is a 256-bit FIFO of *bits*. Each packet is appended behind
the bits already held. Whenever 128 or more bits are waiting, the lowest 128
go to the trace memory, at most one word per cycle. When a trace ends, a
flush flag travels down the pipeline behind the last sample. Full words
leave as usual, and a shorter remainder is written in one extra cycle as a
zero-padded word.

**Real-time guarantee.** The memory word (128 bits) is longer than the
longest packet (99 bits). After each cycle fewer than 128 bits remain, so
every new packet fits and nothing is lost in any mode, even at cycle level
with all signals. This is why the memory is 128 bits wide. A 32-bit memory
cannot keep up with back-to-back transfers at the full signal level (91
bits per transfer). If `TM_WIDTH` is set below 99, the buffer drops a packet
that does not fit, counts it in `trc_drop_cnt` and sets the loss bit of the
next packet it stores.

`trace_memory` is a FIFO over a `DEPTH`×`W` array with read and write
pointers that wrap around. In wrap mode, a write to a full memory replaces
the oldest word. Otherwise the memory raises `almost_full` when only
`AFULL_MARGIN` (8) words are free. This ends the trace early enough that the
samples still in the pipeline fit, so the stored trace ends with a complete
packet. Reads have one cycle of latency, as in a block RAM.

## Reading the trace out

Raise `tout_enable`. `trace_out` reads the oldest word and holds it on
`tout_data` with `tout_valid` until `tout_ready` is seen, then fetches the
next. That is one word every three cycles at best, which is enough for
off-loading after a trace. `trc_count` tells how many words are left.
Off-loading can also run during a trace; the memory then acts as a plain
FIFO.

## The AHB master

`ahb_master` is the traffic source on the traced port. It takes a command
(`cmd_addr`, `cmd_beats`, `cmd_write`, `cmd_wdata`, `cmd_lock`) and performs
word transfers at consecutive addresses: `HBURST` = SINGLE for one beat,
INCR for more. Write beat *i* carries `cmd_wdata + i`. Read beats come back
on `rd_valid`/`rd_data`, and `cmd_done` ends the command.

The master requests the bus and starts when `HGRANT` is sampled with
`HREADY`. After losing the bus in mid-burst it restarts with NONSEQ. It holds
address and control during wait states. On the first cycle of a two-cycle
ERROR, RETRY or SPLIT response it drives IDLE and abandons the command
(`cmd_error`); it does not retry.

## Latency summary

| path | cycles |
|---|---|
| event hit → trace_en / mode change | 1 |
| bus cycle → abstracted record | 1 |
| record → compressed record | 2 |
| compressed record → packet | 1 |
| packet → word written to memory | ≥ 1 |
| `tout` read → word on `tout_data` | 2 |

`trc_done` rises when the trace has ended, five cycles of pipeline have
passed and the bit FIFO is empty.

## Parameters of `top_tracer`

| parameter | default | meaning |
|---|---|---|
| `TM_WIDTH` | 128 | trace memory word, must be ≥ 99 for loss-free tracing |
| `TM_DEPTH` | 128 | trace memory words (16 kbit in all) |
| `BUF_BITS` | 256 | packing FIFO, ≥ `TM_WIDTH` + 99 |
| `NUM_EVENTS` | 2 | event registers (register map grows by 4 addresses each) |
| `BEATS_W` | 8 | width of the master's beat count |

The dictionary size (16) and the packet layout are constants in
`tracer_pkg`; the dictionary contents are the `DICT` parameter of
`compression`.

## Relation to the paper

Taken from the paper:

* the chain of blocks and their jobs;
* abstraction in a timing and a signal dimension;
* dynamic mode switching;
* event registers with a matching circuit controlling start, stop, mode
  and depth;
* tracing before and after a trigger;
* a pipelined, read-only dictionary of frequent addresses;
* a header on every compressed datum, generated in one pipeline stage;
* the packing jobs: packet management, circular buffer management and mode
  change control;
* a FIFO that writes a memory word whenever it holds at least a word, plus
  one extra cycle for the remainder;
* a FIFO-style trace memory;
* a trace-out stage;
* the AHB master port signals;
* runs with and without compression.

This design's own choices:

* **Everything numeric:** widths, depths, dictionary size and contents,
  number of events.
* **Formats and interfaces:** the packet format, the register map, the
  valid/ready trace-out.
* **Mode details:** the four signal levels, and the pairing of address and
  data phases at transaction level.
* **Memory end handling:** the almost-full stop and the drop-and-mark
  policy.
* **The bus master:** its command interface, its burst choice, and its
  no-retry error policy.

Differences worth knowing:

* **Trace memory size.** The paper's FPGA implementation used a single block
  RAM. Here the storage is the same (16 kbit), but it is 128 bits wide
  instead of narrow. On a Spartan-3E device, whose block RAM ports are at
  most 36 bits wide, this takes four block RAMs.
* **Register access.** The paper does not say how the event registers are
  written. Here there is a bare register port, with no bus slave interface
  and no read-back.
* **Dictionary.** It is fixed at build time, as the paper's ROM is. It
  does not learn addresses at run time.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops after a watchdog limit.
Testbench-only helpers:

* `tb/ahb_slave_model.sv`: a behavioural slave and arbiter with random wait
  states, random grant withdrawal and an ERROR address;
* `tb/trace_decode_pkg.sv`: the reference packet decoder.

Every testbench builds the same way with Verilator 5: the package and the
decoder package are named first, and the modules are found in `rtl/` and
`tb/` by name:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module tb_top_tracer rtl/tracer_pkg.sv tb/trace_decode_pkg.sv tb/tb_top_tracer.sv
./obj_dir/Vtb_top_tracer
```

Replace `tb_top_tracer` with any other testbench name (`tb_packet_gen`,
`tb_trace_buffer`, ...) to run that block alone.

`tb_top_tracer` runs the whole design at its default parameters. The slave model adds random wait states
and grant withdrawal throughout, and answers one transfer with ERROR. The
testbench takes under a second and records six traces (the last item covers two):

1. START/STOP events at transaction level, all fields, compression on, depth
   4. The stored words must equal, bit for bit, the stream encoded
   independently from the bus monitor's list of transfers.
2. Start on arm, then a MODE event switching from transaction-level
   address+data to cycle-level address only. The samples are decoded and
   matched against the monitored transfers and bus cycles.
3. The densest mode (cycle level, all fields, no compression) without wrap.
   It checks that no packet is lost, that the almost-full stop works, and
   that the samples are consecutive bus cycles.
4. Wrap mode with a long trace and a trigger at the end. The memory must hold
   exactly the last 128 words of the expected stream.
5. The last two traces run one fixed program twice, at transaction level
   with all fields: first without compression, then with it. The program is a loop
   over hot addresses plus one cold address each round. Both streams must be
   exact, and the compressed one must be shorter by exactly 28 bits per
   dictionary hit. For 66 transfers with 48 hits this gives 6014 bits
   (47 words) against 4670 bits (37 words).

It counts how often each mechanism fired and fails if one never did.

The mechanisms: START, STOP and MODE events; dictionary hits and misses;
mode packets; both timing levels; the full-memory stop; the circular
overwrite; the padded last word; a traced ERROR; wait states; trace-out
back-pressure; a compressed trace shorter than the same trace uncompressed.

The packet-loss path needs a memory narrower than 99 bits, so
`tb_trace_buffer` feeds one 99-bit packet per cycle to two packers at once.
The 32-bit packer must drop packets, count them and mark every gap. The
128-bit packer must keep all of them.

## Limitations

* One traced master port. Watching a shared bus behind a multiplexor would
  need the observed signals to be taken from the bus side instead.
* The dictionary is fixed at build time, and only addresses are compressed.
* A wrapped trace can begin mid-packet (see [Packet format](#packet-format)).
* The trace-out stream runs at a third of a word per cycle.
