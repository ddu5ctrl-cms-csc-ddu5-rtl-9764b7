# DDU5 central control FPGA

The DDU (Detector-Dependent Unit) of the CMS cathode-strip-chamber readout
takes the event data of up to 15 chamber boards (DMBs), one optical fiber per
board. For every level-1 accept (L1A) it writes one event record framed by a
DDU header and trailer. It also reports its state to the fast-merging module
(FMM) and can send the records as Ethernet frames over a gigabit link. This
repository is SystemVerilog for the central control FPGA of that board. The
control FPGA:

- decodes the trigger commands;
- tracks the bunch crossing and the event number;
- flags L1As that arrive too close together;
- checks the incoming DMB words;
- builds the event record, with its word count and CRC-16;
- serves a JTAG register map;
- drives the FMM status, the fiber LEDs and the GbE transmitter.

Everything runs on one 40 MHz clock (one bunch crossing per cycle). The GbE
transmitter runs on its own clock.

## Data flow

```
 CCB cmd/L1A ─► ccb_cmd_decode ─► reset_seq (soft reset, MRST)
                     │  L1A              bxn_counter ─┐
                     └──► close_l1a (18-BX pipe, close flag, BXN-18) ◄┘
                              └─► event number + BXN ─► L1A queue
 36 DDR pins ─► ifddr36 ─► skid FIFO ─► special_word_check, crc22_64
                                   └──► event_formatter (H1-H3, data, T-2, T-1, TR, crc16_64) ─► dout
 JTAG ─► jtag_ctrl ─► kill_reg, BX limit, occupancy, status readout
 fmm_status ─► fmm[3:0]          fiber_led x15 ─► LEDs
 output FIFO (16 bit) ─► bus_match ─► FIFO ─► gbe_tx (+gbe_ordered_set) ─► bus_match ─► 18-bit transceiver word
```

## Trigger side

The CCB drives a 6-bit command bus and an L1A line. Normal boards see both
inverted. Track-Finder boards (board IDs 1 to 3) see them non-inverted.
`ccb_cmd_decode` restores the true polarity and registers the command. It
gives a one-cycle strobe when the value changes. The codes are listed in
`ddu_pkg`: soft reset 0x1C, start 0x06, stop 0x07, sync reset 0x03, BC0 0x01,
and CFEB calibration 0x14 to 0x16. In fake-L1A mode the L1A, sync reset and
BC0 from the trigger are ignored.

A soft reset starts `reset_seq`. The soft reset comes up first. The master
reset (MRST) follows inside it, and the soft reset stays high one step after
MRST ends. At 40 MHz the steps are 25 ns, 50 ns and 25 ns.

`bxn_counter` counts bunch crossings from 0 to a limit and is cleared by BC0.
The limit defaults to 3563, the LHC orbit. It can be read or loaded over JTAG,
for example 923 for the SPS.

`close_l1a` sends every L1A through an 18-stage shift register (450 ns). When
an L1A leaves the register, it is marked close if another L1A came fewer than
18 crossings before or after it. Its bunch crossing is the running counter
minus 18, taken modulo the orbit. The close flag travels as bit 12 of that
crossing number. The event number counts these delayed L1As. Each pair of
{event number, crossing} waits in a 16-entry queue. If the queue overflows,
the DDU is out of sync: `fmm_status` shows lost sync until the next sync
reset.

## Readout side and the event record

The input FIFOs deliver 72 bits per clock over 36 pins clocked on both edges.
`ifddr36` captures them:

- bits 63:0 are a DMB data word;
- bit 64 marks the last word of a DMB block;
- bit 65 marks a valid word.

The read enable runs ahead into an 8-word skid FIFO, so the FIFOs' read
latency costs nothing.

Each DMB block ends with a word that carries the block's CRC-22: its low 11
bits are in bits 10:0 and its high 11 bits in bits 26:16. `crc22_64`
recomputes this CRC. DMB blocks arrive in fiber order, so block k belongs
to the k-th live, enabled fiber. A CRC error marks that fiber in the
event's trailer, and in a register kept until reset and read over JTAG.
`special_word_check` handles control words, meaning
words with bit 15 set in some 16-bit lane. Bits 15..12 must agree across all
four lanes. The check takes a 2-of-4 vote on each bit and raises an error on
any disagreement.

`event_formatter` writes one record per queued L1A. Each word is 64 bits:

| word | contents (MSB to LSB) |
|------|----------------------|
| H1 | 0x5, event type, 24-bit event number, 12-bit BXN, 12-bit source ID, format version 5, 4 bits 0 |
| H2 | 0x8000_0001_8000, 1, DMB-full flags (15) |
| H3 | live DMBs (16), output status (16), DMB data-available (16), status with close flag in bit 15 (12 bits), DMB count (4) |
| data | the DMB words as received |
| T-2 | 0x8000_FFFF_8000_8000 |
| T-1 | end-of-event status (32), 0, fibers with a CRC-22 error (15), DMB warnings (16) |
| TR | 0xA, 0, 24-bit word count, CRC-16, status (8), FMM state (4), 0 |

The word count includes the header and trailer. An event with no live,
enabled fiber is therefore 6 words long.

`crc16_64` covers every word of the record, with the trailer's CRC field read
as zero. The CRC is x^16+x^15+x^2+1, taken MSB first and starting from
0xFFFF. Data starts three cycles after the last header word.

`event_timeout` raises a start timeout when no data arrives within 128 cycles
(3.2 µs) of an event start, or 288 cycles (7.2 µs) in calibration. It raises
an end timeout after 38914 cycles (about 0.97 ms). It also keeps the longest
readout time seen. `occupancy_mon` keeps 60 saturating 32-bit counts, one for
each of 15 fibers x 4 boards. The counts are read over JTAG.

## FMM state

`fmm[3:0]` has four bits:
- bit 0: busy;
- bit 1: warning (the L1A queue is half full, or the warning input);
- bit 2: lost sync;
- bit 3: error.

Until `system_rdy` the state is busy. The error bit is a sticky latch of the
error conditions: a special-word error, an end timeout, or the external
`err_cond` inputs. Only a reset clears it.

## JTAG register map

User chain 1 holds an 8-bit instruction. User chain 2 holds a 32-bit data
register, captured from the selected source and shifted LSB first. The
opcodes:

| op | function |
|----|----------|
| 0 | no operation |
| 1 | reset: acts as a sync reset |
| 2 | read the 24-bit event number |
| 3-5 | read the status word (whole, low half, high half) |
| 6 | read the output path status |
| 10 | read the per-fiber CRC error flags |
| 13 / 14 | read / load the 20-bit kill register |
| 22-24 | read error registers A, B, C |
| 25 / 26 | read live-DMB flags |
| 27 | read the warning monitor |
| 28 | read the longest readout time |
| 29 / 30 | load / read the BX-per-orbit limit |
| 31 | toggle CFEB-calibration mode |
| 32 | read the board ID |
| 33 | send an L1A |
| 34 | read the occupancy counts, stepping through all 60 words |

Bits 14:0 of the kill register enable the fibers (0 kills a fiber). Bits
19:15 can switch off the ALCT, TMB, CFEB and DMB checks.

## GbE transmitter

The output FIFO delivers 16-bit words; `bus_match` packs four of them into
each 64-bit word. `gbe_tx` sends the following 9-bit code-groups ({K flag,
byte}):

1. K27.7, six 0x55 bytes and 0xD5;
2. six 0xFF bytes (the broadcast destination address);
3. the data words, most significant byte first;
4. a 16-bit packet number;
5. zero fill, so that at least 56 bytes follow the preamble;
6. the Ethernet CRC-32, low byte first;
7. K29.7 and K23.7.

A frame ends on an event end, when the FIFO runs empty, or after 8960 data
bytes. Between frames the transmitter sends idle ordered sets (K28.5 D16.2)
for 1280 cycles. The wait is skipped while the FIFO is above its
almost-empty mark. During reset it sends sync sets (K28.5 D21.5 K28.5 D2.2).
A second `bus_match` pairs the code-groups into 18-bit transceiver words.

## Where this design departs from or goes beyond its source

- The board's original notes give two BX-per-orbit defaults (3563 and
  923/924). The later one, 3563, is the reset value; 923 can be loaded.
- The notes give three frame sizes (7680, 7952 and 8960 bytes). This design
  uses 8960 data bytes.
- The 450 ns close-L1A test counts crossings exactly. The original combines
  L1As into 75 ns bins through a small table.
- The placement of the DMB CRC-22 word, the input word flags, the skid
  FIFO, the L1A queue and its overflow rule are this design's choices. So
  are the CRC-16 bit order and start value, and the LED blink rates.
- The following are not implemented:
  - the CFEB CRC check (its polynomial is not known);
  - the detailed DMB, TMB and ALCT header and trailer checks, and most bits
    of error registers A, B and C. Only A15 (end timeout), A14 (start
    timeout), A9 (special-word disagreement), B0 (a DMB is full), C7 (hard
    error) and C1 (checks enabled) are driven;
  - the GbE receive path;
  - the input-FPGA, VME and DCC interfaces;
  - the transceiver and clock primitives.

  Their signals are ports of the top: `err_cond`, `live_dmb`, `dmb_full`,
  `dmb_dav`, the FIFO interfaces and the 18-bit transceiver word.

## Files

- `rtl/ddu_pkg.sv`: codes, constants and the per-word control struct.
- `rtl/ddu5ctrl.sv`: the top, with the blocks above.
- Helpers: `anyorall.sv` (any/all/not-all of four bits) and `sync_fifo.sv`.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_ddu5ctrl.sv`: runs the whole top at its default parameters. It
  sends commands and L1As and feeds DMB blocks on the DDR pins. It works the
  JTAG map and loops the event records back through the GbE transmitter. It
  checks every record: marker, event number, BXN, close flag, data, word
  count, CRC-16 and CRC-error fibers. It also decodes every frame and checks
  its packet number, zero fill and CRC-32. It runs
  the board's word-count examples: 1 to 15 DMBs, and the largest event under
  the 30070-word limit (15 DMBs x 5 CFEBs x 16 samples = 30066 words). Their
  trailer counts must match 6 + 25·samples·CFEBs + 4·DMBs. It counts each mechanism
  and fails if one never happens: soft reset, BC0, sync reset, start/stop,
  calibration, CCB and JTAG L1As, close L1As, data and empty events, CRC-22
  error, special-word error, start and end timeouts, queue overflow, each FMM state,
  BX-limit load, occupancy readout, JTAG reset, Track-Finder polarity and GbE
  frames.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl --top-module tb_ddu5ctrl \
    rtl/ddu_pkg.sv tb/tb_ddu5ctrl.sv -o sim && obj_dir/sim
```

Replace the top module name to run any block testbench. Some testbenches
shrink the slow parameters, such as the LED blink width and the GbE frame
size and wait. The top testbench runs at the defaults in well under a second.
