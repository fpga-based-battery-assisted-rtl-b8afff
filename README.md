# WISP FPGA tag: an EPC Gen2 RFID tag core in plain logic

This is the digital core of a battery-assisted passive UHF RFID tag: a
sensing tag in the WISP style, where the microcontroller that usually runs the
tag protocol is replaced by FPGA logic. The analog front end stays outside the
core and delivers two plain signals:

- `rx` is the comparator output of the envelope detector. It is high while the
  reader's carrier is on and low during the reader's amplitude-modulation
  notches.
- `tx` drives the RF switch that changes the antenna load, and with it the
  backscattered signal.

In between, the core implements the tag side of the EPC Class-1 Gen-2 air
interface:

- It decodes the reader's pulse-interval-encoded (PIE) commands.
- It takes part in the slotted-ALOHA inventory round.
- It answers with its EPC, and serves Read and Write to its four memory banks.
- It fills the User bank from an SPI sensor.

The main idea is that nothing about the link is fixed at build time. Every
frame the reader sends is timed in system clock cycles, and every Query carries
the divide ratio, the modulation and the pilot flag. So the core follows any
Tari (6.25–25 µs), any backscatter link frequency (BLF, 40–640 kHz) and any of
FM0 or Miller-2/4/8 without reconfiguration. Because the whole datapath is
parallel logic, a reply starts on schedule: one Gen2 T1 interval after the
command, under 20 µs at the fastest reader settings.

All logic runs on one clock, `clk`, at 24 MHz by default. Reset is
asynchronous and active low.

```
            +--------------------------- receive ------------------------------+
  rx ------>| sot_detector -> delimiter_verifier -> preamble_handler           |
            |      -> command_framer --bits--> crc_checker                     |
            |      -> command_decoder ------------------------------+          |
            +-------------------------------------------------------|----------+
                                                                     v cmd_t
            +---------------------- main entity ------------------------------+
            | tag_controller <--- rng16                                       |
            |      |  ^ pc_word                                               |
            |      v  |                                                       |
            | tag_memory <---- sensor_manager <----> SPI sensor               |
            +------|--------------------------------------------------------- +
                   v reply_t, tx_start
            +--------------------------- transmit ----------------------------+
            | response_framer --bits--> crc_generator                         |
            |      |                                                          |
            | preamble_generator -> response_encoder -> tx                    |
            |                          ^ half_tick                            |
            |                      freq_divider (BLF from TRcal and DR)       |
            +-----------------------------------------------------------------+
```

The top module is `wisp_fpga_tag` (`rtl/wisp_fpga_tag.sv`). Its ports are:

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | system clock (CLK_HZ) and asynchronous active-low reset |
| `rx` | in | demodulated reader envelope, asynchronous; synchronised inside |
| `tx` | out | RF-switch control; 1 = modulating load |
| `spi_sclk`, `spi_cs_n`, `spi_mosi` | out | SPI master to the sensor, mode 0 |
| `spi_miso` | in | SPI data from the sensor |
| `tag_state` | out | Gen2 tag state (`tag_state_e`), for observation |

Shared types live in `rtl/wisp_pkg.sv`:

- `cmd_t` is a decoded command.
- `reply_t` describes a reply.
- The enumerations cover commands, modulation and tag states.
- There are also the CRC constants.

## Reading the reader: delimiter, calibration and PIE bits

A reader frame begins with a delimiter, a notch of 12.5 µs. Then come the
calibration symbols:

- data-0, whose length defines Tari;
- RTcal, equal to data-0 plus data-1;
- TRcal, but only in the preamble that opens a Query.

All other commands begin with a frame-sync, which has no TRcal. After that,
each symbol is a data-0 or a data-1. The two differ only in length, and each
ends in a short low pulse.

Four blocks turn this into bits.

**`sot_detector`: start of transmission.**
- It passes `rx` through a three-flop synchroniser and gives rising and falling edges.
- It declares a carrier after `rx` has stayed high for `CW_MIN_US` (8 µs).
- A falling edge that arrives with a carrier present starts a delimiter.
- Requiring the carrier keeps noise on a quiet line from starting frames.

**`delimiter_verifier`.**
- It counts the length of the low pulse and accepts 12.5 µs ±5%.
  - At 24 MHz this is 285 to 315 cycles.
- A notch outside that window is rejected, and the frame is ignored.

**`preamble_handler`.** It times every symbol from one rising edge of `rx` to
the next, in clock cycles.
- The first interval after the delimiter is Tari. The second is RTcal.
- The third interval is the deciding one.
  - If it is longer than RTcal, it is TRcal and the frame is a preamble.
  - Otherwise it is already the first data bit of a frame-sync.
- This follows the Gen2 rule that TRcal lies between 1.1 and 3 × RTcal.
- The command has ended once `rx` has stayed high for ¾ RTcal.
  - No data symbol is that long with its low pulse still to come.
  - The Gen2 reply delay is at least RTcal, so this decision always arrives in time.
- If a counter saturates because no edge comes, the frame is aborted.

**`command_framer`.**
- It compares each symbol with the pivot, RTcal/2. A longer symbol is a data-1.
- The bits are collected in a 66-bit register, first bit at the top.
- Each bit is also fed serially to `crc_checker`.
  - `crc_checker` keeps a CRC-5 (x⁵+x³+1, preset 01001) and a CRC-16 (CCITT, preset FFFF) in parallel.
  - A frame passes when the remainder is zero (CRC-5) or 1D0F (CRC-16).

**`command_decoder`.** It classifies a frame by its length and its leading code bits:

| Command | Bits | Code | Check | Decoded fields |
|---|---|---|---|---|
| Query | 22 | 1000 | CRC-5 | DR, M, TRext, Sel/Session/Target (ignored), Q |
| QueryRep | 4 | 00 | – | Session (ignored) |
| QueryAdjust | 9 | 1001 | – | UpDn |
| ACK | 18 | 01 | – | RN16 |
| NAK | 8 | 11000000 | – | – |
| Req_RN | 40 | 11000001 | CRC-16 | RN16 or handle |
| Read | 58 | 11000010 | CRC-16 | bank, word pointer, word count, handle |
| Write | 66 | 11000011 | CRC-16 | bank, word pointer, data, handle |

Word pointers are extensible bit vectors (EBV). Only the one-byte form is
accepted, which covers word addresses 0–127. A frame with a bad CRC, or one
that matches no command, is reported as `CMD_BAD` and ignored. The decoded
command is a registered `cmd_t`, a few clock cycles after the end of the frame.

## Tag state machine (`tag_controller`)

This is the main entity. It acts on each command according to the Gen2 tag
states Ready → Arbitrate → Reply → Acknowledged → Secured. The access password
is zero, so the Open state is passed over.

| Command | State | Action |
|---|---|---|
| Query | any | latch DR, M, TRext and Q; slot = Q low bits of the RNG; slot 0 → Reply and backscatter an RN16, else Arbitrate |
| QueryRep | Arbitrate | slot − 1; at 0 → Reply with a new RN16 |
| QueryRep | Reply | back to Arbitrate (slot parked) |
| QueryRep, QueryAdjust | Acknowledged / Secured | → Ready (the tag's inventory is complete) |
| QueryAdjust | Arbitrate / Reply | Q ± 1 (saturating at 0 and 15), new slot |
| ACK | Reply / Acknowledged, RN16 matches; Secured, handle matches | reply PC + EPC + CRC-16; Reply → Acknowledged |
| ACK | otherwise, not Ready | → Arbitrate |
| NAK | Reply / Acknowledged / Secured | → Arbitrate |
| Req_RN | Acknowledged, RN16 matches | reply new handle + CRC-16 → Secured |
| Req_RN | Secured, handle matches | reply fresh RN16 + CRC-16 (used to cover the next Write) |
| Read | Secured, handle matches | reply header 0, the words, handle, CRC-16; word count 0 or beyond the bank → error reply |
| Write | Secured, handle matches | write data XOR last RN16, reply header 0, handle, CRC-16; out of range → error reply |

Three more details matter:

- The ACK reply length comes from the length field of the PC word, its top
  five bits. So the EPC length is set by memory contents, not by logic.
- Error replies carry header 1 and error code 03h (memory overrun), followed by
  the handle and the CRC.
- `rng16` is a 16-bit Fibonacci LFSR, taps 16, 14, 13 and 11. It steps every
  cycle, so the value drawn depends on when the reader's commands arrive.

**Reply timing.** A reply is started `T1 = max(RTcal, 10 BLF periods)` after
the last rising edge of the command. This is the Gen2 nominal T1. The
controller counts clock cycles from that edge and compares them with RTcal and
with 20 half periods from the frequency divider.

At the fastest reader settings (Tari 6.25 µs, RTcal = 2.75 Tari, BLF 640 kHz),
T1 = max(17.2 µs, 15.6 µs) = 17.2 µs. The reply therefore starts within 20 µs
of the command's end. Commands that arrive while a reply is still being sent
are ignored. The tag does not listen while it modulates.

## Backscatter: link frequency, reply framing and encoding

This is the part with the most interacting timing, and the part where a single
half-period slip makes a reply unreadable. A reply is produced by four blocks
working in lockstep.

### Link frequency (`freq_divider`)

The reader sets the tag's backscatter link frequency indirectly, as
BLF = DR / TRcal. DR is 8 or 64/3, from the Query, and TRcal is measured by the
preamble handler. The encoder works in half BLF periods, so the divider
computes one half period in clock cycles:

- DR = 8: `half = round(TRcal / 16)`
- DR = 64/3: `half = round(3·TRcal / 128)`

These give the following half periods at 24 MHz:

| BLF | DR | TRcal | half period | half-period error |
|---|---|---|---|---|
| 640 kHz | 64/3 | 33.3 µs = 800 cycles | 19 cycles (18.75 exact) | +1.3% |
| 320 kHz | 64/3 | 66.7 µs = 1600 cycles | 38 cycles (37.5 exact) | +1.3% |
| 240 kHz | 64/3 | 88.9 µs = 2133 cycles | 50 cycles | 0% |
| 640 kHz | 8 | 12.5 µs = 300 cycles | 19 cycles | +1.3% |

Rounding costs at most half a cycle in a half period of 19 or more, under
3%. That is inside the BLF tolerance Gen2 allows at these settings. A slower
clock gives shorter half periods and a larger error, which is why the clock
should stay well above 16 × the highest BLF.

When a reply starts, the divider is restarted (`sync_clr`). Its first
`half_tick` then comes exactly one half period after the first level is put on
`tx`.

### Reply framing (`response_framer`, `crc_generator`)

The controller describes each reply with a `reply_t`. Its fields are:

- an optional header bit;
- an optional 8-bit error code;
- a run of `count` 16-bit words, starting at word `ptr` of `bank`;
- an optional RN16 or handle;
- an optional CRC-16 over everything before it.

The framer streams these bits MSB first through a valid/ready handshake. Memory
words are fetched through the tag memory's synchronous read port. The gaps
between segments are at most three clock cycles, far shorter than one half
period. Every data bit also goes to `crc_generator`, which outputs the
complement of its register as Gen2 requires. The framer appends those 16 bits
last.

These are the replies the tag sends:

| Reply to | Content |
|---|---|
| Query / QueryRep / QueryAdjust | RN16 |
| ACK | PC, EPC words, CRC-16 (the PC is EPC-bank word 1) |
| Req_RN | RN16 or handle, CRC-16 |
| Read | 0, words, handle, CRC-16 |
| Write | 0, handle, CRC-16 |
| error | 1, error code, handle, CRC-16 |

### Preambles (`preamble_generator`)

Each reply begins with a preamble, which the generator hands to the encoder as
a sequence of symbols:

- FM0: `1 0 1 0 v 1`, where v is a violation symbol. When TRext = 1, twelve
  data-0 pilot symbols come first.
- Miller: 4 data-0 pilot symbols (16 when TRext = 1), then `0 1 0 1 1 1`.

### Encoding (`response_encoder`)

The encoder turns symbols into `tx` levels, one level per `half_tick`.

**FM0.**
- A symbol is two half periods.
- The level inverts at every symbol boundary.
- A data-0 also inverts in mid-symbol.
- The violation symbol of the preamble does not invert at its boundary. This
  break in the pattern marks the preamble. As half-period levels the FM0
  preamble reads `11 01 00 10 00 11`.
- The idle level is 0, so the first half period of a reply is high.

**Miller-M (M = 2, 4, 8).**
- A symbol is 2·M half periods.
- A baseband level inverts in mid-symbol for a data-1. It also inverts at the
  boundary between two consecutive data-0s.
- The baseband is multiplied by a square subcarrier of M cycles per symbol.
- The subcarrier starts high at the start of every symbol. On `tx` this shows
  as `level XOR (half-period count is odd)`.

A symbol thus lasts `2 << mode` half ticks, with `mode` = 0 for FM0 and 1, 2, 3
for M = 2, 4, 8. The encoder keeps a half-period counter within the symbol. It
decides the level of each half period from three things: the current bit, the
previous bit and whether the half period is the middle one.

**End of reply.** After the last data bit, the encoder sends the Gen2
end-of-signalling dummy data-1 and then returns `tx` to 0. The `done` pulse
releases the controller.

Only one event can disturb this: the framer failing to offer the next bit in
time. That cannot happen at the supported rates, because the framer needs at
most three cycles and a half period is at least 19. The encoder nonetheless
flags it (`underrun`).

### A reply from end to end

For an ACK at Tari 6.25 µs, FM0 and 640 kHz, with a 96-bit EPC:

1. The command's last rising edge happens.
2. After T1 = 17.2 µs (413 cycles), `tx_start` fires.
3. The 6-symbol preamble takes 9.4 µs.
4. PC + EPC + CRC = 128 bits take 200 µs.
5. The dummy 1 takes 1.6 µs.

## Memory and sensor

**`tag_memory`** holds the four Gen2 banks in one array addressed by
{bank, word}. There are `BANK_WORDS` = 32 words of 16 bits per bank, which is
2048 bits in all.

| Bank | Contents at reset |
|---|---|
| 0 Reserved | kill and access passwords, zero |
| 1 EPC | word 0 StoredCRC (not maintained); word 1 PC with length = `EPC_WORDS`; words 2.. the EPC, word k = {E, k, k·17} |
| 2 TID | E280, 1105 |
| 3 User | word 0 is the latest sensor sample |

The EPC length can be changed at run time by writing the PC word through a
Write command. The ACK reply follows the new length at once, up to 30 words
(480 bits).

The memory has two write ports:

- Port A serves the reader's Write and always wins.
- Port B serves the sensor manager, with request and acknowledge.

Reads are synchronous, one cycle of latency. Accesses beyond a bank's size
are ignored, and reads there return 0. The controller turns such a request
into an error reply before it reaches memory.

**`sensor_manager`** is an SPI master in mode 0: SCLK idles low, MOSI changes
on the falling edge, and MISO is sampled on the rising edge. Frames are 32
bits, MSB first, and one SCLK half period is `CLK_DIV` cycles.

- After reset it sends one configuration frame, `{CFG_CMD, CFG_VAL}`.
- Then, every `SAMPLE_CYCLES` cycles (1 ms by default), it sends `{RD_CMD, 0000}`.
- It keeps the 16 bits returned in the second half of that frame.
- It writes them to User-bank word `DEST_PTR`. A reader obtains the sample with
  an ordinary Read of bank 3.

The command words are placeholders to be matched to the sensor actually fitted.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `wisp_fpga_tag` | `CLK_HZ` | 24 000 000 | system clock; all timing is derived from it |
| | `EPC_WORDS` | 30 | EPC length in words at reset (480 bits) |
| | `BANK_WORDS` | 32 | words per memory bank |
| | `SAMPLE_CYCLES` | 24 000 | sensor sampling period in cycles |
| `sot_detector` | `CW_MIN_US` | 8 | carrier time before a delimiter is believed |
| `delimiter_verifier` | `DELIM_NS`, `TOL_PCT` | 12 500, 5 | delimiter length and tolerance |
| `command_framer` | `MAX_BITS` | 66 | longest command (Write) |
| `rng16` | `SEED` | ACE1 | LFSR reset value |
| `sensor_manager` | `CLK_DIV`, `CFG_CMD`, `CFG_VAL`, `RD_CMD`, `DEST_PTR` | 4, 2001, 0001, 8000, 0 | SPI clock divider and command words |

The interval counters are 16 bits wide. At 24 MHz that is 2.7 ms, far beyond
the longest Gen2 symbol (TRcal at 40 kHz is 533 µs = 12 800 cycles). A faster
clock needs no change until `CLK_HZ` × 533 µs exceeds 65 535, which happens at
about 120 MHz.

Synthesised at the defaults (yosys, generic cells), the core is roughly:

- 800 cells;
- 700 flip-flops;
- the 2048-bit memory.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops, and a watchdog ends a hung run
as a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/wisp_pkg.sv tb/tb_wisp_fpga_tag.sv --top-module tb_wisp_fpga_tag \
    -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run any other. The two system-level benches run
the top at its default parameters, and each finishes in about a second of wall
time.

| Testbench | What it shows |
|---|---|
| `tb_wisp_fpga_tag` | end to end, see below |
| `tb_read_rate` | inventory cycles at the reader settings used for read-rate and throughput measurements; prints read rates and throughput per EPC length and read rate per Q |
| `tb_sot_detector` | carrier qualification, edge latency, arming |
| `tb_delimiter_verifier` | limits of the ±5% window, both sides |
| `tb_preamble_handler` | Tari/RTcal/TRcal measurement, preamble vs frame-sync, end-of-command and abort |
| `tb_command_framer` | random symbol streams around the pivot, overflow |
| `tb_crc_checker` | CRC-5 and CRC-16 against a reference model, single-bit errors |
| `tb_command_decoder` | every command, random fields, corrupted CRCs, wrong lengths |
| `tb_tag_controller` | the state table above, slot counting, T1 |
| `tb_rng16` | LFSR sequence and period properties |
| `tb_tag_memory` | banks, port priority, out-of-range access |
| `tb_sensor_manager` | SPI frames against a sensor model, sample period, memory handshake |
| `tb_response_framer` | segment order and CRC of each reply type |
| `tb_crc_generator` | CRC-16 against a reference model |
| `tb_preamble_generator` | all four preamble forms |
| `tb_freq_divider` | half period and first-tick alignment for DR 8 and 64/3 |
| `tb_response_encoder` | FM0 and Miller-2/4/8 waveforms against an independent encoder |

The end-to-end bench contains a reader model and a receiver. The reader model
PIE-codes commands with real delimiter, Tari, RTcal and TRcal timings. The
receiver samples `tx` every half period and decodes FM0 or Miller. The bench:

- runs inventory rounds at Tari 6.25, 7.5, 12.5 and 25 µs;
- covers BLF 640, 320 and 240 kHz, DR 8 and 64/3, FM0, M2, M4 and M8, and TRext;
- counts down slots with QueryRep and changes Q with QueryAdjust;
- sends NAK, a corrupted CRC and a bad delimiter;
- reaches Secured and exercises Read, Write and error replies;
- reads back a sensor sample;
- checks every reply's CRC and content, and that every reply starts between T1
  and T1 + 8 cycles.

It counts how often each of these mechanisms occurred and fails if any never did.

Simulation uses two-state values with random initial contents. Every register
that is read has a reset.

## Performance against the reported measurements

The reported measurements were taken with commercial readers over the air.
Two benches give the tag's own contribution: `tb_read_rate` and the latency
checks.

| Measurement | Reported | This RTL (24 MHz) |
|---|---|---|
| Processing latency | under 20 µs | T1 = 17.2 µs at Tari 6.25 µs / 640 kHz, met to within 8 cycles |
| Read rate, 32-bit EPC (Tari 7.5 µs, M2, 640 kHz) | about 1200 reads/s | tag-limited 2715 reads/s; 1051 with the bench's reader gaps |
| Read rate, 480-bit EPC (same settings) | about 400 reads/s | tag-limited 560 reads/s; 423 with the bench's reader gaps |
| Throughput, 480-bit EPC (Tari 6.25 µs, FM0, 640 kHz) | 307 kb/s | tag-limited 536 kb/s; 347.5 kb/s with the bench's reader gaps |

"Tag-limited" counts only the tag's share of a read: from the end of the Query
to the end of the RN16 reply, plus from the end of the ACK to the end of the EPC
reply. The reported rates sit below these, consistent with their being limited
by the reader, not the tag.

The bench also sweeps the slot-count parameter Q from 0 to 6 at the read-rate
settings with a 32-bit EPC. Each Q gets four rounds of Query, QueryRep until the
tag answers, then ACK. It checks that the tag always answers within 2^Q − 1
QueryReps, as Gen2 requires.

With one tag and a reader that simply steps through the slots, the rate falls
as Q grows, from about 1050 reads/s at Q = 0 to about 76 at Q = 6. This is
because empty slots cost reader time. The reported rise of read rate with Q
therefore comes from the reader's own round scheduling, which this bench does
not model.

## Where this design departs from a full Gen2 tag, and its own choices

**Left out.** These parts of Gen2 are not implemented:
- Select, sessions and inventoried flags. Every Query is answered; Sel, Session
  and Target are ignored.
- Kill, Lock, Access, BlockWrite, BlockErase.
- The Open state and non-zero passwords.
- Multi-byte EBV pointers.
- Word counts of 0 ("read to end of bank").
- StoredCRC maintenance.
- The tag's own link-timing check T2/T3.
- Replies with the extended (XPC) protocol-control word.

**Reply timing.** The tag uses the nominal T1 exactly. Gen2 permits a window
around it, and a different reader may prefer a later start.

**End of command.** End of command is decided after ¾ RTcal of high `rx`. This
is quick, but a reader that stretches the low pulse of its last symbol
unusually long would still be decoded correctly only if that pulse stays below
¾ RTcal.

**Noise during replies.** While replying, the tag ignores the receive path. A
command that arrives during a reply is lost, not queued.

**Own choices.** The following are this design's own:
- The system clock rate.
- The memory sizes and reset contents.
- SPI as the sensor bus, rather than I²C, and the SPI frame format.
- The carrier qualification time.
- The end-of-command rule.
- Rounding of the link-frequency divider.
- The handshakes between blocks.

**Taken from the original design.** These come from the original design:
- The split into blocks and their roles:
  - start-of-transmission detection, delimiter verification and preamble handling;
  - command framing, CRC checking and decoding;
  - the main entity with its RNG and memory;
  - the sensor manager;
  - response framing, preamble generation, CRC generation and encoding;
  - a frequency divider for the link clock.
- The 12.5 µs ±5% delimiter.
- The 16-bit RNG.
- The support for FM0 and Miller-2/4/8.

Everything the blocks do on the air follows the Gen2 air interface.
