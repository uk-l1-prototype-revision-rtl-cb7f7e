# L1 buffer board logic (revision 3 prototype), in SystemVerilog

This board sits between twelve optical links from HPD pixel front-end electronics and a PC. Every L0 trigger makes each link deliver one event: two L0 header words, a 32×32-pixel hit map (LHCb mode, 32 words) or a 256-row map (ALICE mode, 256 words), and a parity word. The board:

- checks each event;
- can shrink LHCb events with zero suppression;
- stores the events in six large buffer memories, two links per memory.

Later, software asks for a block of memory rows. The board sends each row as one Ethernet frame over a 100 Mbit/s link. Events are never read back on their own: the buffer is a flat log, and the reader takes it apart.

The RTL models the FPGA logic of the board:

- the per-channel data path;
- the buffer controllers;
- the Ethernet frame transmitter;
- the configuration and status registers behind a small command protocol;
- an on-board event generator;
- a TTC (timing and trigger) source encoder;
- the PHY management master;
- the front-panel LEDs.

Chips and vendor macros around the FPGA appear as ports: the serial transceivers, the memories, the Ethernet PHY, the TTCrx receiver, the USB microcontroller and the clock managers.

## Data path at a glance

```
link n --> rx_channel --> FIFO 18x1024 --> zs_encoder --> FIFO 18x1024 --+
                 \__ event descriptor FIFO __/                          |
                                                                        v
   channels 2m, 2m+1 --> event_mux (memory m) --> buffer_ctrl (memories 0-2 | 3-5)
                                                          |
                      buffer_ctrl 0 / 1 --> egress_mux --> eth_tx --> MII (100baseTX PHY)
```

The twelve channels are identical, and there are six multiplexers and two controllers. Everything runs on one 80 MHz clock (`clk`). The only exception is the TTC encoder, which runs on the TTCrx 40 MHz clock (`clk40`).

All FIFOs carry an 18-bit word: a start-of-event flag, an end-of-event flag and 16 data bits (`fifo_word_t` in `l1_pkg`). A 32-bit link word always travels as two 16-bit halves, low half first. That is also the byte order in memory and in the Ethernet payload. As a result, a little-endian PC that reads the concatenated payload as 32-bit words sees the original words.

## Input channel (`rx_channel`)

- **Auto-sense.** After reset the channel watches its link for `SENSE_CYCLES` (1024). A link that is not synchronised by then is treated as unused and inhibited. Configuration register 16+n can also inhibit a channel. The loss-of-sync LED ORs only the channels that are *not* inhibited by configuration, so inhibiting unused channels by hand makes the LED meaningful.
- **Format.** The channel counts the event's length. More than 35 32-bit words means ALICE, otherwise LHCb. Bits 3 and 2 of the channel's configuration register force a format.
- **Parity.** The last 32-bit word must equal the XOR of all the words before it. Mismatches are counted in an 8-bit counter per channel. Channels 0–3 can be read in status registers 10 and 11.
- **Whole events only.** An event is written to the FIFO only if the FIFO has room for an ALICE event (518 free words) and the descriptor queue has room. Otherwise the whole event is dropped and counted as an overflow. So the zero-suppression stage downstream never sees half an event.
- **Descriptor.** For each stored event the channel pushes {format, parity error, length} into a small descriptor FIFO. The encoder then knows what it is about to read before it starts.

## Zero suppression and the L1 header (`zs_encoder`)

Every stored event gets one 32-bit **L1 header** in front of it:

| bits | field |
|---|---|
| 30:16 | event id (per channel; counts events since the last reset or L1 reset) |
| 15:13 | memory bank id (= channel / 2) |
| 12 | ALICE flag |
| 11 | zero-suppression flag |
| 10:0 | number of 32-bit words that hold zero-suppression entries |

When zero suppression is on for the channel and the event is in LHCb format, the 32 pixel words are replaced by a list of entries. The list has one 16-bit entry for every non-zero byte of the 32×32 hit map:

```
entry = {1'b0, addr[6:0], byte[7:0]},   addr = 4 * row + byte_index_in_row_word
```

Two entries are packed per 32-bit word, the lower address in the low half. The list is padded with zero words to the original 32 words. Every LHCb event therefore still occupies 2 + 32 + 1 words plus the header: 72 16-bit words in memory. This keeps the buffer layout fixed whatever the occupancy. The gain is in what the reader has to decode, not in memory space.

A hit map with more than 64 non-zero bytes cannot be listed in 32 words. Such an event is stored unsuppressed, with the flag clear. ALICE events are never suppressed.

The encoder reads the whole pixel block first, because the header (and its count) has to go out before the list. Example: with hits that make bytes 0x10 at address 0x00, 0x80 at 0x0D, 0x02 at 0x15 and 0x40 at 0x22, the list is `0x0D800010, 0x22401502` followed by 30 zero words. `tb_zs_encoder` checks exactly this.

## Channel-pair multiplexer (`event_mux`)

This block takes whole events alternately from the two ZS FIFOs of a pair. It never interleaves two events. The output is a short queue that the buffer controller drains.

## Buffer memories and their controllers (`buffer_ctrl`)

Each controller owns three 256 Mbit memories on one shared address bus. The address is `{row[14:0], column[8:0]}`: a row is 512 16-bit words = 1024 bytes, exactly one Ethernet payload.

**Lockstep writing is the key idea.** The three memories share one write pointer. A word is written only when every *active* memory of the group has a word ready, and all of them are written in the same cycle.

- Because all events have fixed lengths, the three memories fill at the same rate. So one row counter and one remainder per controller describe all three memories.
- A memory whose two channels are both inhibited is inactive. It is skipped: never waited for, never written.
- Writing stops when the memory is full. Nothing wraps around.

Status registers 6 and 7 hold the number of **complete** rows of each controller. Register 4 holds, for each controller, the number of valid 32-bit words in the last, partial row. To get everything, a reader fetches one row more than register 6 or 7 says and cuts the last one using register 4.

The **L1 reset** clears the pointers, counts, event ids and event counter, but leaves the memory contents. The full **system reset** clears everything.

**Readout** is requested through control registers 0 and 1:

- register 0: memory number in bits 2:0, number of rows minus one in bits 15:8, start trigger in bit 3;
- register 1: first row.

A rising edge of register 0 bit 3 starts the readout. For example, writing 0x0902 and then 0x090a sends 10 rows of memory 2. The controller streams one row at a time. It waits until the Ethernet transmitter's row buffer is free, because nothing in the network can slow the board down.

The memory ports are simple synchronous word ports with one cycle of read latency. SDRAM command sequencing (activate, precharge, refresh, initialisation) is **not** implemented. It belongs in a memory interface between `mem_*` and real devices. Reads and writes share the address bus: while a row is being read, which takes 512 cycles, writing pauses and the FIFOs absorb the incoming data.

## Ethernet transmitter (`egress_mux`, `eth_tx`)

`egress_mux` passes on the readout stream of the controller that owns the requested memory and counts the rows going in and out (status register 15). `eth_tx` takes one row into its egress RAM and sends it as one frame over the MII, one nibble per `mii_ce`, low nibble first. The frame is:

| bytes | content |
|---|---|
| 8 | preamble and start delimiter |
| 14 | destination MAC (broadcast), source MAC 02:00:00:00:00:10, type 0x0800 |
| 20 | IPv4 header: id = row number, TTL 64, protocol 0xF2, header checksum; source 192.168.x.y from register 31, destination 192.168.2.2 |
| 22 | event-builder (MEP) header, all zero |
| 1024 | the memory row, low byte of each 16-bit word first |
| 4 | padding (zero) |
| 4 | CRC-32 |

The frame is followed by 12 idle byte times. There is no flow control and no retransmission. A reader that loses a frame asks for the row again: its row number is in the IP id field.

The low 15 bits of the IP source address come from control register 31 when its bit 15 rises. The default is 192.168.2.16. `eth_tx` also keeps the last two 16-bit words it sent, on debug outputs.

## Control interface (`cmd_if`, `ctrl_regs`)

The USB microcontroller passes 12-byte little-endian messages:

```
byte 0: command, 1..7: length and reserved, 8: register id, 9: reserved, 10..11: value
```

| command | code | effect |
|---|---|---|
| StatusRequest | 0x01 | answer only |
| ResetRequest | 0x02 | system reset |
| ConfigurationData | 0x03 | write a register |
| L1ResetRequest | 0x04 | L1 reset, no answer |

Every command except the L1 reset is answered with 4 header bytes (code 0x81) followed by a snapshot of all 32 status registers, 64 bytes. No new command is accepted while an answer is going out. The command interface is not reset by the system reset it triggers, so that its answer still gets out.

The control registers are:

- 0, 1: readout request and first row;
- 2: emulator (bit 0 inhibit, 1 ALICE, 12:8 burst length);
- 3, 4, 5, 6, 7: TTC encoder;
- 16+n: channel n (bit 0 zero suppression, 1 inhibit, 2 format, 3 force format);
- 31: IP address.

After reset every register is zero, except the emulator, which is inhibited.

## L0 emulator (`l0_emulator`)

When the emulator is enabled, every L0 trigger starts a burst of 1–31 events. Each event goes to all twelve channels in place of the link data, in LHCb or ALICE format. Events of a burst are `GAP_CYCLES` (72) clocks apart. Each event carries its number in the first L0 word, a single hit that moves from event to event, and a correct parity word. The board can therefore be exercised with no front end connected.

## TTC encoder (`ttc_a_pulser`, `ttc_b_encoder`)

These blocks run on `clk40`.

The A-channel pulser sends trains of pulses. The train length is set by register 3 and the spacing, in clk40 cycles, is register 4 + 1. A train is triggered by:

- a rising edge of register 3 bit 15;
- a rising edge of the external trigger input, when enabled in register 5 in edge mode. In clocked mode the input level, sampled on clk40, is instead passed straight to the A channel;
- optionally, a calibration broadcast from the TTCrx (0x1C). The single pulse then follows register 4 + 1 cycles later.

The B-channel encoder sends one command per rising edge of register 5 bit 0. Frames are MSB first and the line idles high:

- short: `0 0 D[7:0] c[4:0] 1`;
- long: `0 1 D[31:0] c[6:0] 1`, with D from registers 7:6.

The check bits `c` are a Hamming SEC-DED code chosen for this design. **They are not the TTC system's own code**, which a real TTCrx expects. Replace `hamming()` in `ttc_b_encoder` with that code before connecting real receivers.

## PHY management (`mdio_master`)

The Ethernet port runs at a fixed 100 Mbit/s, full duplex, with auto-negotiation off. After reset, `mdio_master` writes 0x2100 into the PHY's control register (register 0). From then on it reads PHY registers 0, 16 and 1, over and over. It uses standard clause-22 management frames at 1 MHz MDC.

Status registers 1, 2 and 3 show the latest values. Status register 0 bit 10 reads 1 until the first round of reads has completed.

## Status and LEDs

The 32 status registers are built in `l1_top`:

| register | content |
|---|---|
| 0 | general status (reset, ready, DLL locks, TTCrx ready, memory initialisation, optical status) |
| 1–3 | PHY registers |
| 4 | remainders |
| 5 | L0 trigger count |
| 6, 7 | complete rows |
| 8, 9 | 24-bit event count |
| 10, 11 | parity counters |
| 12, 13 | last two words received on link 0 |
| 14 | TTCrx id |
| 15 | egress flow counters |
| 16–27 | channel status: inhibit, loss of sync, overflow, clock correction and event counters |
| 28–31 | TTCrx registers |

The event count follows the lowest-numbered channel among 0–5 that is not inhibited.

The LEDs:

| LED | on when |
|---|---|
| green 0 | always |
| green 1 | both DLLs locked |
| green 2 | board ready |
| yellow 0 | L0 trigger |
| yellow 1 | writing |
| yellow 2 | reading |
| red 0 | loss of sync on an unmasked channel |
| red 1 | TTCrx not ready |
| red 2 | TTCrx I2C error |

The yellow LEDs are held on for 2^22 clocks after each event.

## Where this differs from, or adds to, the original board

- The original board runs the channel-pair multiplexers and the memory writes at 160 MHz, twice the 80 MHz link word rate. Here they share the 80 MHz clock. So a memory takes at most one 16-bit word per cycle for its two channels together, and the input FIFOs smooth out bursts. At trigger rates where both links of a pair stream continuously, the FIFOs eventually fill and events are dropped (and counted as overflows).
- The original FIFOs are probably dual-clock, between each link's recovered clock and the system clock. Here everything after the transceiver is in one clock domain.
- The following are this implementation's choices, not taken from the board's documentation:
  - the parity rule (XOR);
  - the auto-sense window;
  - the format detection by length;
  - the whole-event drop policy;
  - the event-id source;
  - the fallback for dense events;
  - the message byte layout and command codes;
  - the Ethernet/IP/MEP header contents apart from the IP source address;
  - the padding length;
  - the emulator's gap and event contents;
  - the B-channel check code;
  - the calibration command code.
- The board's register table names status registers 12 and 13 both the last words *transmitted* and transceiver *receive* data. This design shows the last two words received on link 0.
- The board's register table gives the IP update edge as high-to-low, while its text says low-to-high. This design uses low-to-high.
- The original board's users are told to stop triggers before a readout, because receiving and sending at the same time is unreliable there. Here writes pause while a row is read and the FIFOs absorb the incoming data, so an overlap is tolerated up to the FIFO depth.
- Control register 1 bit 15 ("request all rows") is not implemented, as on the original board.
- Not built: SDRAM command control, TTCrx I2C access (status registers 28–31 are inputs), and the clock managers and pads. The PHY address (0) and MDC rate of the management master are this design's own choices.

## Files

- `rtl/l1_pkg.sv`: constants, the FIFO word, the L1 header and channel configuration types, command codes, and a CRC-32 step function.
- `rtl/*.sv`: one module per file, named as above, plus `sync_fifo` (the FIFO used everywhere).
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`.
- `tb/l1_mem_model.sv`: a sparse behavioural model of three buffer memories.
- `tb/mdio_phy_model.sv`: the management side of a PHY.
- `tb/tb_l1_top.sv`: the whole board at its default sizes. It:
  - lets two links stay unsynchronised;
  - turns on zero suppression for half the channels;
  - sends 20 events per link, including one dense event and one with bad parity;
  - decodes all five filled memories back to the original pixels;
  - reads 10 rows of memory 2 and 2 rows of memory 3 as Ethernet frames and compares them byte for byte with the memories;
  - exercises the emulator in both formats, the L1 and system resets, the IP address change, the PHY management set-up, the TTC A channel (software, calibration and external triggers), the TTC B channel and the LEDs.

  It fails if any of these mechanisms did not occur.

To simulate with Verilator (5.x):

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_l1_top -y rtl -y tb \
    +libext+.sv rtl/l1_pkg.sv tb/tb_l1_top.sv
./obj_dir/Vtb_l1_top
```

Any other testbench builds the same way. Replace `tb_l1_top` with its name. The full-board test simulates about 1.2 ms of board time in well under a second of run time.
