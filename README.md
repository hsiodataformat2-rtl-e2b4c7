# HSIO readout and control core

The HSIO board sits between a host PC and silicon-strip detector front-ends
(a stave with top and bottom hybrids, plus auxiliary modules on IDC
connectors). The host controls everything, and receives all the data, over
raw Ethernet. There is no IP stack. Every frame carries a list of small
commands called *opcodes*. The board answers each opcode and acknowledges
each frame. Independently of that, it streams event data from up to 104
serial readout links.

This repository holds a synthesizable SystemVerilog model of that core. It
covers:

- the packet handler;
- the opcode blocks (echo, registers, status, commands, per-stream
  configuration, I2C);
- 104 readout streams with their buffering rules, busy generation and
  packetisation;
- the trigger, BCR and ECR generation onto the COM and L1R lines, with a
  random trigger-burst sequencer;
- the arbitration and framing of everything the board transmits.

The Ethernet MAC/PHY and board-level peripherals are not included. The core
connects to them through plain ports.

Everything runs on one clock, the 40 MHz bunch-crossing clock.

## Frames

All traffic is made of 16-bit words. A frame, in either direction, is laid
out like this:

| word | content |
|------|---------|
| 0-2  | destination MAC |
| 3-5  | source MAC |
| 6    | type field, used as the magic number `0x8765` |
| 7    | packet sequence number (set by the host, returned in the replies) |
| 8    | length in bytes, counted from the magic word to the CRC, padding included |
| 9    | opcode count |
| 10…  | opcodes: id, sequence, payload size in bytes, payload words |
| last | CRC-16 |

**Receiving (`pkt_rx`).**
- A frame is stored whole. If its magic is wrong, it is dropped.
- The source MAC of the last good frame becomes the destination of
  everything the board sends.
- The opcodes are then offered one at a time on the *opcode bus*:
  - first a header beat, whose data is the opcode id;
  - then one beat per payload word.
- The id, sequence number and size stay on sideband signals for the whole
  opcode.
- Each opcode block raises `op_ready` only for ids it owns.
- If no block takes the header within `TIMEOUT_CYCLES` (one second), the
  echo block grabs the opcode. It returns the opcode with `0xB` in the top
  nibble of its id.
- After the last opcode, `pkt_rx` issues the network Ack. The Ack is a
  frame with the packet's sequence number and an opcode count of 0.
- A frame that arrives while the previous one is still being dispatched is
  dropped and counted. The host is expected to wait for the Ack.
- The CRC of received frames is not checked; the MAC's FCS covers them.

**Transmitting (`pkt_arbiter`, `pkt_tx_builder`).**
- Each reply or data packet leaves the opcode blocks and streams as a
  *body*: packet sequence, opcode count (1), then the opcode.
- A fixed-priority arbiter picks whole bodies in this order:
  1. the network Ack;
  2. the opcode replies;
  3. stream traffic, which a round-robin arbiter has already merged across
     the streams.
- The builder buffers a body and then sends the frame:
  - it prepends the MAC addresses and the magic;
  - it fills in the length;
  - it pads with zeros up to the 64-byte Ethernet minimum (32 words);
  - it appends the CRC. The CRC is CRC-16-CCITT: polynomial 0x1021, initial
    value 0xFFFF, MSB first, taken over the words from the magic through the
    padding.

  The CRC polynomial and the board's own MAC address (`02:48:53:49:4f:00`)
  are this design's choices.

## Opcodes

| id | block | function |
|----|-------|----------|
| 0x0003 ECHO | `ocb_echo` | payload returned unchanged |
| 0x0010 REGWRITE | `ocb_regs` | (register, value); replies (register, new value) |
| 0x0014 / 0x0015 REGBLOCK_WR / RD | `ocb_regs` | write / read all 32 registers; reply holds all 32 |
| 0x0019 STATREAD | `ocb_status` | reply holds the 32 status words |
| 0x0030 COMMAND | `ocb_command` | mask word 0: one-cycle pulses (0 trigger, 1 BCR, 2 ECR, 5 BCID reset, 6 L1ID reset, 8 burst start, …); optional mask word 1: resets (0 all streams, 1 burst sequencer, …) |
| 0x00F0 RESET_OCB | `ocb_command` | pulses reset bit 2 |
| 0x0050 STRM_CONF_WR | `ocb_stream` | bit mask, then (stream id, data) pairs |
| 0x0051 STRM_REQ_STATS | `ocb_stream` | 9 stream masks; each selected stream sends a status packet |
| 0x0052 BSTRM_CONF_WR | `ocb_stream` | 9 stream masks, bit mask, data (the 10-word form without a bit mask is also accepted) |
| 0x005C / 0x005E STRM_COMMAND / BSTRM_COMMAND | `ocb_stream` | stream command by id pairs or by masks |
| 0x0080 TWOWIRE | `ocb_twowire` | I2C transactions, one reply word per request word |
| other | `ocb_echo` | after the timeout: returned as 0xBnnn |

Replies use the same opcode id and sequence number as the request. The
stream opcodes and COMMAND reply with the single word `0xACAC`. All reply
bodies come from one small sequencer, `ocb_reply`. Its parent block supplies
the payload words by index.

Stream ids:
- 0-47 are the top hybrids;
- 64-111 are the bottom hybrids;
- 128-135 are the IDC modules.

The nine mask words cover ids 0-143, 16 per word. Ids with no stream behind
them are ignored.

## Readout streams

Each stream (`stream_unit`) owns a 16-bit StreamConfig word:

| bits | meaning |
|------|---------|
| 0 | enable |
| 3:1 | data source |
| 5:4 | deserialiser mode |
| 6 | busy on trigger/header delta |
| 7 | busy on FIFO level |

A masked write replaces only the bits selected by its bit mask.

Data sources:
- **0**: the stream's serial input. One bit arrives per cycle in which
  `stream_bit_en` is high.
- **4** and **5**: counter generators. On every trigger they produce an
  event of `LEN0` or `LEN1` words (registers 7 and 8) holding a running
  count.
- Other source codes produce nothing.

**Deserialiser (`stream_deser`).**
- In *header/trailer* mode (00), it searches the bit history for the event
  header, then packs bits into 16-bit words. The first bit received becomes
  bit 15. The event ends at the word in which the trailer completes.
- In *capture* mode (01), a capture start takes `LEN0` words of raw bits,
  rounded down to a multiple of 16.
- Modes 10 and 11 are idle.
- The header and trailer patterns belong to the front-end chips. Here they
  are parameters:
  - header `11101`;
  - trailer `1` followed by fifteen `0`s.

**Event buffer (`stream_fifo`)** — the part with the most rules:

- The data FIFO holds 768 words: one full network packet of 1.5 kB.
- A lengths FIFO (16 entries) holds one entry per packet to send: word count,
  fragment number and a truncated flag.
- A new event is accepted only if the lengths FIFO has room for two entries.
  Otherwise the event is dropped, the stream's dropped-header counter counts
  it, and error 0x05 is raised.
- **Fragmentation.** An event longer than one packet (`FRAG_WORDS` = 742
  data words) is split into two packets, fragment 0 and fragment 1.
- **Truncation.** The event is truncated if either:
  - the data FIFO fills, or
  - fragment 1 would also overflow.

  What has been stored is closed as a packet. Everything up to the event's
  trailer is then discarded, and no new header is looked for until that
  trailer arrives.
- **Trailer timeout.** The wait for the trailer has no limit. After
  `TRAILER_TO` cycles (1 ms), one error packet is raised:
  - 0x02 if the event was cut in fragment 0;
  - 0x03 if it was cut in fragment 1;
  - 0x04 if nothing of it was stored.
- Only one error is held at a time; a second one arriving meanwhile is not
  reported.

**Packets.** A packetizer turns FIFO entries, errors and status requests
into bodies. Each carries the stream's own sequence number.

| packet | opcode | payload |
|--------|--------|---------|
| data | `0xD0mm` | header word {stream id, fragment}, event words |
| error | `0xF0mm` | header word, error code |
| status | `0x0051` | header word, StreamConfig, StreamStatus word 1 |

`mm` is `04` in capture mode and `00` otherwise.

StreamStatus word 1 holds:

| bits | field |
|------|-------|
| 15:12 | dropped headers |
| 11:10 | lengths-FIFO fill, in quarters |
| 9:8 | data-FIFO fill, in quarters |
| 7 | `busy_fifo` |
| 6 | `busy_delta` |
| 5:0 | the trigger/header delta |

**Busy.**
- A 6-bit delta counter goes up on each trigger and down on each header
  seen. `busy_delta` is set while the delta exceeds 15; this threshold is
  fixed.
- `busy_fifo` is set while the data FIFO is at least half full.
- Each busy is passed on only if its StreamConfig enable bit is set.
- The board busy is the OR of all stream busies and CONTROL bit 0.
- While busy, external triggers are vetoed and the burst sequencer pauses.
- A stream reset empties the FIFO and clears the delta. It is issued by
  StreamCommand bit 15, or for all streams by COMMAND word 1 bit 0.

## Triggers and the COM line

Triggers, BCRs and ECRs come from three places:
- the external inputs, enabled by IN_ENA bits 0-2. The external trigger is
  also vetoed while busy;
- COMMAND pulses;
- the burst sequencer (triggers only).

The last two are enabled by INT_ENA bits 0-2.

`com_encoder` serialises the commands at one bit per clock:

| command | pattern |
|---------|---------|
| trigger | `110` |
| BCR | `1010010` |
| ECR | `1010100` |

With CONTROL bit 12 set, a trigger instead goes out as `10` on the separate
L1R line. OUT_ENA bits 0-2 gate each kind. Requests that arrive together
are queued: trigger first, then BCR, then ECR.

The encoder also keeps three counters:
- the bunch-crossing counter, 12 bits, cleared by BCR/ECR;
- the L1ID, 24 bits, cleared by ECR;
- the BCID of the last trigger.

These appear as status words 7-9.

`trig_burster` runs `TB_BURSTS` bursts of `TB_TRIGS` triggers:
- Before each trigger it waits a random time between `TB_PMIN` and
  `TB_PMAX`.
- Between bursts it waits `TB_PDEAD`.
- All three times are in 400 ns units.
- The random value comes from a 16-bit LFSR, scaled into the range with a
  multiply.
- Its state (triggers left, bursts left, and flags ready/running/finished)
  is status words 4-6.

## Two-wire (I2C) master

TWOWIRE requests are *packetlets*. Each one starts with a control word,
which selects the channel (bits 3:0) and the clock (bits 7:4). The clock is
100 kHz, 10 kHz or slower.

Each following word is one command:

| bit | meaning |
|-----|---------|
| 12 | append a stop |
| 11 | prepend a start |
| 10 | send the low byte |
| 9:8 | number of bytes to read (0-2) |

Every request word gets a reply word:
- the control word and send-only words are echoed;
- read words return the bytes read.

Read bytes are acknowledged, except the last one before a stop. A word
starting with `111` separates packetlets. If a slave does not acknowledge,
`ocb_twowire` releases the bus with a stop and fills the rest of the
packetlet's reply with `0xF00B`.

Only the I2C protocol is built. Other protocol codes reply `0xF00B`. The
buses are open-drain: the core drives pull-low enables and reads SDA back.

## Status words

| word | content |
|------|---------|
| 0 | hardware id `0x0C02` |
| 1 | `0xA510` |
| 2 | firmware version (`VERSION`, default `0x4182`) |
| 3 | number of modules (a module is 4 streams) |
| 4-6 | burst sequencer |
| 7-9 | BCID at last trigger, L1ID |
| 10-14 | network interface status (input port) |
| 16 | top module bitmap |
| 18 | bottom module bitmap |
| 20 | IDC module bitmap (low byte) |
| 22-23 | `TIMESTAMP` (22 holds bits 15:0) |

Words 17 and 19 (histogrammers) read 0.

## Where this model departs from, or fills in, the protocol

- The busy threshold is fixed at 15, as the busy rules describe. The
  register list also names a global BUSY_DELTA on/off register (17); that
  register is stored but not used.
- The trigger destination is CONTROL bit 12. One place in the protocol names
  bit 10.
- Stream masks: 9 words are used, covering ids 0-143. The opcode table shows
  only 7.
- TWOWIRE "send byte" is command bit 10 (`0x04nn`). This follows the bit
  table; one example lists it as `0x00nn`.
- The following are all choices:
  - the Ack body layout;
  - the data-packet header word;
  - the generator data pattern;
  - the status-packet layout;
  - the header and trailer patterns;
  - the lengths-FIFO depth;
  - the trailer timeout;
  - the CRC polynomial.
- The front-end data arrive as already-sampled bits with an enable. Input
  delay and phase alignment are outside the core.

## Not included

- Ethernet MAC and PHYs.
- Display driver, input delay control, simulation data generators,
  histogrammers.
- COM pattern memory and raw-signal playback (RAWCOM, RAWSIG,
  COM_PATTERN).
- Signal spy block, ABC130 packet deserialiser.
- Trigger delay, BCO duty cycle, L0 delay.
- The front-end chips and I2C devices themselves.

The CONTROL register bits other than 0 (soft busy), 11 (trigger as capture
start) and 12 (trigger destination) act on such board-level parts. So does
the COM_ENA output routing register (16). The core stores them but does not
use them.

Their registers can still be written and read. COMMAND bits that would drive
them are brought out on `cmd_pulse` and `rst_pulse`.

## Parameters of `hsio_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `N_TOP`, `N_BOT`, `N_IDC` | 48, 48, 8 | streams at ids 0…, 64…, 128… |
| `FIFO_WORDS` | 768 | data FIFO per stream |
| `FRAG_WORDS` | 742 | data words per packet |
| `TIMEOUT_CYCLES` | 40 000 000 | unclaimed-opcode timeout (1 s) |
| `TRAILER_TO` | 40 000 | trailer timeout (1 ms) |
| `CLK_HZ` | 40 000 000 | clock, used for the I2C bit rate |
| `TB_TICK` | 16 | burst-sequencer unit in clocks (400 ns) |
| `VERSION`, `TIMESTAMP` | 0x4182, 0 | status words 2, 22, 23 |

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing -Irtl -Itb --top-module tb_stream_fifo \
        rtl/hsio_pkg.sv tb/tb_stream_fifo.sv
    ./obj_dir/Vtb_stream_fifo

The other modules are found through `-Irtl`.

| testbench | what it covers |
|-----------|----------------|
| `tb_hsio_top` | The whole core at reduced size (4+4+4 streams, 64-word FIFOs, short timeouts), acting as the host. It sends frames and decodes every frame the core transmits, checking MACs, length and CRC. It also drives a stream's serial input. It makes each mechanism happen and checks it: Ack, dropped frame, echo, unclaimed opcode, registers, status, commands, stream configuration and status, generator and deserialised data, fragmentation, truncation with its timeout error, busy and the trigger veto, burst sequencer, COM and L1R, and an I2C abort. Runs in seconds. |
| `tb_hsio_top_full` | The core at its default size (104 streams). One echo, register set-up, three generator streams triggered; an 800-word event comes back in two fragments. It takes about a minute to compile and run. |
| `tb_ocb_twowire` | Runs against a behavioural I2C slave inside the testbench. |

## Files

`rtl/hsio_pkg.sv` holds the opcode ids, constants and the `word_t` stream
type. Each other module is in `rtl/<module>.sv`. `ocb_reply` is the shared
reply sequencer.
