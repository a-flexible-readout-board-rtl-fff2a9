# πLUP readout firmware: RD53A ⇄ FELIX protocol converter with chip emulator

The RD53A pixel readout chip sends its data as four Aurora 64b/66b lanes.
The FELIX readout card only understands the GBT and FULL mode link
protocols. This RTL is the FPGA logic of a readout board that sits between
the two:

- **Downlink.** It takes the chip's four Aurora lanes, unpacks events and
  register frames, and sends each as a packet on a FULL mode link to FELIX.
- **Uplink.** It takes trigger and configuration commands that arrive from
  FELIX and serialises them into the RD53A command stream on an e-link.
- **Emulator.** It contains an RD53A emulator: a model of the chip's digital
  behaviour, built from synthesizable logic. The emulator answers the same
  command stream with valid-looking events and register frames, so the data
  acquisition chain can be exercised without a real chip.

A processor on the board controls all of this through a small AXI4-Lite
register block.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. The
self-checking testbenches are in `tb/`.

## Block diagram

```
            AXI4-Lite (from the processor, via a chip-to-chip bridge)
                 │
          ┌──────┴───────┐ CTRL ──► sync_ff / handshake_sync ──► clk_ttc domain
          │ axi_reg_block│ STATUS ◄── handshake_sync ◄── counters (clk_ttc, clk_full)
          └──────────────┘
 gbt_cmd ─► ttc_encoder ──elink──┬──────────────────────────────► elink_out (to a real chip)
 (decoded    (+ internal         │
  GBT cmds)   triggers)          ▼
                          rd53a_emulator
                 rd53a_cmd_decoder → register file
                                   → rd53a_event_gen → FIFO → rd53a_aurora_tx
                                                                │ 4 lanes
 ext_lanes (real chip) ─────────────────────────────► mux ◄─────┘
                                                       │ CTRL0[0]
                                              protocol_converter
          aurora_rx_decoder → serializer → async_fifo ─┼─► fullmode_tx ─► full_data / full_charisk
               (clk_ttc, 160 MHz)                      │   (clk_full, 240 MHz)
```

`pilup_top` wires all of the above together. Parts of the board that are
vendor IP or hardware are not included:

- the GBT-FPGA core;
- the AXI chip-to-chip bridge and the interconnect;
- the processor;
- the multi-gigabit transceivers, including the FULL mode 8b/10b encoder;
- the PLLs and clock chips.

Where such a part would connect, the top brings the signals out as ports.

## Clock domains and crossings

| clock      | rate used | what runs on it |
|------------|-----------|-----------------|
| `clk_axi`  | any       | register block, STATUS read-back |
| `clk_ttc`  | 160 MHz   | e-link (one command bit per cycle), emulator, Aurora side of the converter |
| `clk_full` | 240 MHz   | FULL mode side: one 32-bit word per cycle = 7.68 Gb/s before 8b/10b |

Each domain has its own active-low asynchronous reset. Three kinds of crossing are used:

- **`sync_ff`**: a chain of three flip-flops (`STAGES`) for single, slowly
  changing bits. These are the source-select bit and the emulator's `locked`
  flag.
- **`handshake_sync`**: moves whole multi-bit words between domains.
  - The source holds a word and raises `data_valid`.
  - The destination sees `data_valid` through a synchronizer, copies the held
    word, and answers with `ack`.
  - The source waits for `ack` to rise and then to fall again. Only then does
    it load the next value.
  - It reloads continuously, so the destination always mirrors a recent,
    coherent copy of a slowly changing register. It never sees a mix of old
    and new bits.
  - Three of these are used:
    - configuration: AXI → TTC, 32 bits;
    - status counters: TTC → AXI, 160 bits;
    - packet count: FULL → AXI, 16 bits.
- **`async_fifo`**: carries the high-rate packet words from the Aurora side
  to the FULL mode side.
  - It is a dual-port memory. The binary read and write pointers are
    converted to Gray code and passed through two-stage synchronizers.
  - `full` and `empty` are computed from registered comparisons.
  - The read port is first-word-fall-through.

## Register map (`axi_reg_block` inside `pilup_top`)

CTRL registers are read/write and drive the logic. STATUS registers are
read-only and are sampled every cycle. Byte strobes (`WSTRB`) are honoured.
Address bits [1:0] are ignored.

A write outside CTRL, or a read outside CTRL and STATUS, changes nothing. It
answers SLVERR, and such a read returns 0. Each channel allows one
transaction in flight. The response comes one cycle after the transfer is
accepted.

| address | name    | contents |
|---------|---------|----------|
| 0x000   | CTRL0   | [0] lane source: 1 = emulator, 0 = external chip |
| 0x004   | CTRL1   | [15:0] internal trigger period in command frames, 0 = off |
| 0x008   | CTRL2   | [7:0] hits per trigger (emulator), [15:8] data frames per automatic register frame |
| 0x100   | STATUS0 | {bad command frames, triggers decoded} |
| 0x104   | STATUS1 | {Aurora alignment errors, Aurora sync-header errors} |
| 0x108   | STATUS2 | {emulator triggers dropped, converter overflows} |
| 0x10C   | STATUS3 | {15'b0, emulator command decoder locked, FULL mode packets sent} |
| 0x110   | STATUS4 | {emulator register frames sent, emulator data frames sent} |
| 0x114   | STATUS5 | {command frames sent, internal triggers sent} |

All counters are 16 bits wide and wrap. The CTRL/STATUS split and the STATUS
base at 0x100 follow the board's firmware. The individual fields are this
design's own choice.

## The RD53A command stream (`ttc_encoder`, `rd53a_cmd_decoder`)

Commands are 16-bit frames sent MSB first on the e-link, one bit per
`clk_ttc` cycle.

- **Sync 0x817E.** The encoder sends it first, and then whenever
  `SYNC_INTERVAL` (32) frames have passed and nothing is queued.
- **Other commands.** Noop 0x6969, ECR 0x5A5A, BCR 0x5959, RdReg 0x6565 and
  WrReg 0x6666.
- **Triggers.** A trigger is a single frame made of two 8-bit symbols:
  - one symbol encodes a 4-bit bunch-crossing pattern;
  - the other encodes a 5-bit tag.
- **Register commands.** Their payload follows as 5-bit values. Each value is
  sent as one 8-bit data symbol, two symbols per frame.
  - WrReg: `{chip_id, 0, addr[8:0], data[15:0]}` in 6 symbols (3 frames).
  - RdReg: `{chip_id, 0, addr[8:0], 6'b0}` in 4 symbols (2 frames).
  - The symbol tables and the `trig_decode` / `data_decode` functions are in
    `pilup_pkg`.

The encoder chooses the next frame in this order:

1. periodic Sync;
2. the remaining frames of a multi-frame command;
3. a new command from `gbt_cmd`;
4. an internal trigger, when the `trig_period` counter expires;
5. Noop.

`gbt_cmd_ready` pulses when a command is taken at a frame boundary.

The decoder shifts the e-link into a 16-bit window until it sees Sync. It
then locks and reads one frame every 16 bits. A frame that is neither a known
command nor a valid trigger counts as a bad frame. A register command acts
only if its chip ID matches `CHIP_ID`, or if chip-ID bit 3 (broadcast) is set.

*These command and symbol encodings follow the RD53A's published command
protocol. The board description only points to the chip manual. Check them
against the manual before connecting a real chip.*

## Emulator (`rd53a_emulator`)

- **Register file.** Register writes go into a 512 × 16 global register file.
  The values are kept and can be read back, but they change nothing: the
  analog front end is not modelled.
- **Event generator (`rd53a_event_gen`).**
  - Keeps a bunch-crossing ID that advances by 4 on every command frame (one
    frame lasts 4 LHC crossings at 160 Mb/s) and is cleared by BCR.
  - Keeps a trigger ID that is cleared by ECR.
  - Each set bit of a trigger pattern queues one bunch crossing, bit 3 first.
  - For each queued crossing it emits:
    - a header `{7'b0000001, trigger_id[4:0], tag[4:0], bcid[14:0]}`;
    - then `n_hits` hit words `{core_col[5:0], row[8:0], side, 4 × ToT[3:0]}`.
  - Hit contents come from a 32-bit Galois LFSR (taps 0x80200003) seeded from
    the header. Columns are forced below 50 and rows below 192, so no hit word
    can equal the filler word. Triggers that find the 16-entry queue full are
    counted as dropped.
- **FIFO.** Events wait in a 256 × 33-bit single-clock FIFO (`sync_fifo`,
  word plus end-of-event flag) before the Aurora output. The same helper
  holds the event generator's trigger queue.

## Aurora 64b/66b output (`rd53a_aurora_tx`, `aurora_scrambler`)

Each lane carries a 66-bit block: a 2-bit sync header (01 = data, 10 =
control) and a 64-bit payload. The payload is scrambled with the
self-synchronising polynomial 1 + x³⁹ + x⁵⁸, and bit 63 goes on the wire
first. The four lanes are *strictly aligned*: in every block cycle all lanes
carry the same block type.

One block cycle carries one of four things:

- **Data cycle.** Eight 32-bit words, two per lane, lane 0 first. Sent when
  eight words are buffered, or when an event ends with two or more words left.
  Slots beyond the event's end are padded with the filler 0xFFFFFFFF.
- **Separator with data.** Control type 0x1E, octet count 4 in
  payload[55:48], the event's last word in payload[31:0]. Lanes 1–3 carry
  Idle (0x78). Used when exactly one word of an event is left.
- **Separator without data.** Octet count 0. Follows a data cycle that ended
  an event.
- **Register frame.** Lane 0 payload
  `{code[7:0], status[3:0], addr_a[9:0], value_a[15:0], addr_b[9:0], value_b[15:0]}`.
  - Code 0xD2: sent after an RdReg, with the requested register in slot a.
  - Code 0xB4: an automatic frame, sent after every `n_frames` data frames.
    It walks through the register file two registers at a time.
  - Register frames are sent only between events.

A new block leaves every `BLOCK_DIV` = 8 `clk_ttc` cycles. That is 20 Mblocks/s
per lane, a payload rate of 1.28 Gb/s per lane and 5.12 Gb/s in all. The real
chip sends 1.28 Gb/s *including* the 2-bit sync headers (19.4 Mblocks/s).
Eight is the nearest whole divider of 160 MHz. The serial 66-bit line, block
lock and lane deskew belong to the FPGA's SERDES, so the lanes here are
presented as parallel 66-bit words with a `lanes_valid` strobe.

## Protocol converter (`protocol_converter`)

This is the part that needs the most care.

1. **`aurora_rx_decoder`** (clk_ttc) descrambles each lane and checks the
   cycle.
   - Cycles with a bad sync header are counted and dropped.
   - Cycles whose lanes disagree on the block type are counted as alignment
     errors and dropped.
   - A data cycle yields up to eight data words. Filler words are skipped.
   - A Separator yields its word, if any, and then an end-of-event marker.
   - A register block yields two words of type REG.
   - The `flush` input discards the next cycle. The top pulses it when the
     lane source changes, because the descrambler needs one block to
     resynchronise.
2. **Serializer.** Writes the items of one cycle into the FIFO, one word per
   clock.
   - Data words are held back by one place. When the end marker arrives, the
     held word is written with `last` set.
   - Register words go straight through: the second word of the pair carries
     `last`.
   - If a new cycle arrives before the previous one has been written out, or
     the FIFO is full, the `overflows` counter is incremented and words are
     lost.
3. **`async_fifo`**: 512 × 35 bits (`{type, last, word}`), from clk_ttc to clk_full.
4. **`fullmode_tx`** (clk_full) frames the packets:
   - `SOP` (K28.1, 0x3C);
   - a header word `{30'b0, type}` (0 = event, 1 = register frame);
   - the packet's words;
   - `EOP` `{busy, 3'b0, crc20[19:0], K28.6 (0xDC)}`.

   It sends IDLE (K28.5, 0xBC) between packets and while the FIFO is
   momentarily empty inside a packet. `tx_charisk` is `4'b0001` on K words.
   CRC-20 uses polynomial 0xC1ACF, starts from all ones, and covers the
   header and payload words MSB first. The BUSY input is copied into every
   EOP. 8b/10b encoding is left to the transceiver.

**Throughput.**

- The Aurora side delivers at most one word per 160 MHz cycle (5.12 Gb/s).
- The FULL side drains 32 bits at 240 MHz (7.68 Gb/s).
- Each packet costs three extra words (SOP, header and EOP).
- An event of eight or more words therefore needs at most 11/8 × 5.12 =
  7.04 Gb/s, which fits.
- Four chips (20.48 Gb/s) would need four converter instances and four FULL
  mode links; the top contains one.

## What follows the board description and what is this design's own

**Follows the description:**

- the block structure of the converter: Aurora decoding, a dual-clock FIFO
  and an FSM feeding the FULL mode core;
- the emulator with four lanes, random hits behind a valid header, and
  configuration that is recorded but not acted on;
- the AXI register block with CTRL and STATUS arrays, STATUS at 0x100, and
  byte strobes;
- the three-stage flip-flop and handshake synchronizers;
- the 64b/66b scrambler polynomial, the Separator and Idle block codes, and
  strict lane alignment;
- the RD53A output word layouts;
- the FULL mode K characters, SOP/EOP framing, the BUSY bit and the 20-bit
  CRC width;
- the clock rates.

**This design's own choices:**

- the RD53A command encoding details (from the chip's protocol, not the
  board description);
- the register codes 0xD2/0xB4 and the filler word;
- the CRC-20 polynomial and initial value;
- the FULL mode packet header word;
- the register map;
- FIFO depths;
- the LFSR;
- the block-rate divider;
- the source-switch flush;
- SLVERR for unmapped addresses.

The GBT link is replaced by a decoded command port (`gbt_cmd`: a `ttc_cmd_t`
struct with valid/ready).

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops on its own, and each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pilup_pkg.sv tb/tb_pilup_top.sv \
          --top-module tb_pilup_top -Mdir obj_top && obj_top/Vtb_pilup_top
```

Replace `pilup_top` with any other block name to run that block's test.

`tb_pilup_top` runs the whole top at its default parameters. In about 180 µs
of simulated time it does the following:

- drives commands through the GBT port;
- loops `elink_out` into a second emulator that plays the external chip;
- switches the lane source both ways;
- uses internal triggers;
- writes and reads back a register through a register frame;
- changes the hit count;
- asserts BUSY;
- parses the whole FULL mode stream, checking every CRC and every packet
  against the expected events;
- reads all STATUS registers;
- finally floods the external lanes with a data cycle every two clocks and
  checks that the overflow counter rises.

It counts each mechanism it sees and fails if any never happened:

- data packets, one-word and multi-block events;
- automatic and requested register frames;
- external-chip events;
- BUSY in EOP.

The block tests compare against models written inside the testbench. These
include a bit-serial scrambler, a bitwise CRC, the symbol tables and a
framing parser. The block tests are:

- `sync_ff`, `handshake_sync`, `async_fifo`;
- `axi_reg_block`;
- `aurora_scrambler`;
- `ttc_encoder`, `rd53a_cmd_decoder`;
- `rd53a_event_gen`, `rd53a_aurora_tx`, `rd53a_emulator`;
- `aurora_rx_decoder`, `fullmode_tx`, `protocol_converter`.

`tb_protocol_converter` runs its two clocks at 160 and 240 MHz. It checks
that `flush` drops exactly one block cycle and that BUSY reaches every EOP.
It sends the densest events, nine words in two block cycles, at the nominal
rate and checks that none is lost. Finally it drives blocks faster than the
serializer can drain them, to show that overflow is detected. Each test has been shown to fail when its block has a
typical bug, for example a wrong scrambler tap, a wrong CRC seed, ignored
write strobes or a missing end-of-event mark.

## Limits

- Not connected to real GBT, chip-to-chip or transceiver IP. The top's ports
  stand in for them.
- The emulator does not model the analog front end, calibration injection or
  the GlobalPulse/Cal commands.
- Lane block lock and deskew are assumed to be done upstream.
- A Separator-7 block (0xE1, seven valid octets) ends an event, but its
  octets are discarded. RD53A data is made of whole 32-bit words, so the
  chip only ends frames with 0 or 4 remaining octets.
- Events shorter than eight words arriving at the full 20 Mblocks/s rate would
  exceed the FULL mode bandwidth. The overflow counter reports this;
  realistic trigger rates stay far below it.
