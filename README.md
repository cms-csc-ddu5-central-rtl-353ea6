# DDU central control FPGA for the CMS cathode strip chambers

The DDU (Detector Dependent Unit) is a readout board of the CMS endcap
muon system. Up to 15 chamber readout boards (DMBs) send their data to it
over optical fibers. After each Level-1 Accept (L1A) from the trigger, the
DDU gathers what every DMB sent for that trigger and passes it on as one
event. The event goes to the central DAQ (DCC / S-Link), and a copy goes to
a Gigabit-Ethernet spy link. Along the way the DDU checks the data and reports
its own state to the trigger throttling system.

This repository holds SystemVerilog for the *central control* FPGA of that
board. The FPGA does the following:

* tracks the LHC clock, the bunch crossings and the L1As;
* keeps a queue of triggers waiting to be read out;
* checks the DMB data streams (special bits, CRC-22, L1A number);
* wraps each event in the DDU header and trailer, with a word count and a
  CRC-16;
* drives the 4-bit FMM status;
* keeps error, timeout and occupancy registers, readable over JTAG;
* formats the spy copy as Ethernet frames.

The fiber receivers, the input FPGAs that buffer each fiber, the
multi-gigabit transceivers and the clock buffers are outside this FPGA, or are
vendor primitives. They are not modelled. Their signals appear as ports of
the top level.

## Clocks and timing

| clock | rate | used by |
|---|---|---|
| `clk` | 40 MHz LHC clock (25 ns) | everything, unless listed below |
| `drck` / `update` | JTAG data-register clock and update strobe | JTAG shift registers |
| `gbe_clk` | 62.5 MHz (16 ns) | GbE packetizer; two 8b/10b characters per clock |

All timing numbers below are in `clk` cycles unless stated.

## How a trigger becomes an event

1. **CCB commands** (`ccb_cmd_decode`). The clock and control board sends
   a 6-bit command bus and an L1A line. The codes are:

   | code | command |
   |---|---|
   | 0x1C | soft reset |
   | 0x06 | start data taking |
   | 0x07 | stop data taking |
   | 0x01 | BC0 |
   | 0x03 | sync reset |
   | 0x14, 0x15, 0x16 | CFEB calibration |

   On the Track-Finder DDU (`tf_mode`), the command bus and the L1A arrive
   with inverted polarity and are flipped back. In fake-L1A mode
   (`fake_mode`), the TTC L1A and the counter resets are ignored. L1As then
   come from the `fake_l1a` pin or from the JTAG instruction 33.
2. **Bunch-crossing counter** (`bxn_counter`). It counts 0…3563 and
   restarts on BC0. The limit is a JTAG-loadable register: instructions 29
   and 30, reset value 3563.
3. **Close-L1A monitor** (`close_l1a_monitor`).
   * Every L1A travels through a 40-stage pipe (1000 ns).
   * If a second L1A enters while one is still in the pipe, both are marked
     *close*.
   * When an L1A leaves the pipe, its BX number is corrected by −40,
     modulo the orbit. The close flag is stored as bit 12 of this "stored
     BXN".
   * The L1A counter (24 bits) advances at that point.
4. **L1A FIFO** (`l1a_fifo`, 256 × 37 bits).
   * Holds {L1A number, stored BXN} for each trigger not yet read out.
   * Warn turns on at 192 entries and off at 128.
   * Busy turns on at 240 and off at 200.
   * The gaps between on and off levels give hysteresis, so the FMM status
     does not flicker.
   * A write into a full FIFO sets a sticky overflow.
5. **Readout FSM** (in `ddu5ctrl_top`).
   * Takes the oldest FIFO entry when data taking is running and the event
     builder is idle.
   * Latches the header fields: DMB full, live and DAV masks (after the Kill
     register), DMB count and FIFO status.
   * Starts the event builder and the timeouts.
6. **DMB data input** (`ifddr36` and a 16-word input FIFO).
   * The input FPGAs deliver one 72-bit word per clock on a 36-bit DDR bus.
     The low half is taken at the falling edge and the high half at the
     rising edge.
   * Word layout: `[63:0]` DMB data, `[64]` valid, `[65]` last word of the
     event, `[69:66]` fiber number.
   * `in_rd_en` drops when the FIFO holds 10 words, telling the sender to
     pause.
7. **DMB checks** (`dmb_check`, with `special_word_check`, `anyorall` and
   `crc22_64`).
   * Each 64-bit DMB word consists of four 16-bit words. Bits 15..12 of
     each are the *special bits*.
   * These bits are voted 2-of-4 and must agree in all four copies.
   * The voted nibble classifies the word: 9 = header 1, A = header 2,
     F = trailer 1, E = trailer 2, anything else = data.
   * The DMB CRC-22 runs over all words up to trailer 1 and is compared
     with the value carried in trailer 2.
   * The 24-bit L1A number in header 1 is compared with the one from the
     L1A FIFO.
   * Errors are kept per event and in sticky per-fiber registers.
   * An L1A mismatch sets FMM *lost sync*.
8. **Event builder** (`event_builder`, `crc16_64`). It sends three header
   words, the DMB words unchanged, and three trailer words. The output is
   a valid/ready stream (`out_valid`, `out_ready`, `out_boe`, `out_eoe`).
   Every accepted word is also written to the external spy FIFO (`spy_wr`).
9. **GbE spy** (`gbe_packetizer`). This part reads the spy FIFO on
   `gbe_clk` and sends Ethernet frames (details below).

Two **timeouts** (`event_timeout`) guard the readout:

| timeout | clocks | time | starts | condition |
|---|---|---|---|---|
| start | 128 | 3.2 µs | when the event builder starts | no data has arrived |
| calibration start | 288 | 7.2 µs | same | calibration events |
| end | 38 914 | ≈ 972 µs | after the data started | last word not yet seen |

A timeout ends the event early and is flagged in the trailer.

A CFEB calibration command (0x14–0x16) marks the next event as a
calibration event, which gets the longer start timeout. JTAG instruction 31
toggles this off and on again.

## DDU event format

All words are 64 bits. Fields are listed from the most significant bit.

| word | contents |
|---|---|
| H1 | `5` `1` L1A[23:0] BXN[11:0] source ID[11:0] FOV[3:0] FMM[3:0] |
| H2 | `0x8000_0001_8000` DMB-full[15:0] |
| H3 | live[15:0] O-star[15:0] DAV[15:0] BOE status[11:0] #DMB[3:0] |
| data | DMB words, unchanged |
| T-2 | `0x8000_FFFF_8000_8000` |
| T-1 | DDU status[31:0] DMB error[15:0] DMB warning[15:0] |
| TR | `A` `0` word count[23:0] CRC-16[15:0] EOF status[7:0] M[3:0] K[3:0] |

* The **source ID** is the board ID. The Track-Finder DDU uses the fixed
  value 760.
* The **word count** includes all six DDU words. An event without data is
  6 words long. With `Nts` time samples, the size is
  `6 + 25·Nts·nCFEB + 4·nDMB`, which gives 210 words for one DMB with one
  CFEB and 8 samples.
* The **CRC-16** uses the polynomial x¹⁶+x¹⁵+x²+1 and runs over every word
  of the event, with the TR CRC field taken as zero. The bits go in most
  significant first and the start value is 0xFFFF (the CRC-16/CMS
  convention).
* **BOE status** (H3) bits: 4 close L1A, 3 L1A-FIFO warn, 2 busy, 1 full,
  0 overflow.
* **DDU status** (T-1) bits:

  | bit | meaning |
  |---|---|
  | 20 | close L1A |
  | 19 | L1A-FIFO warn |
  | 18 | L1A-FIFO busy |
  | 17 | hard error |
  | 16 | special-bit error |
  | 15 | CRC error |
  | 14 | L1A error |
  | 13 | start timeout |
  | 12 | end timeout |

* **DMB error** (T-1) has one bit per fiber.
* **M** is the four check-disable bits from the Kill register. **K** is the
  FMM state.

T-2 is held back for three clocks after the last DMB word, until the checks
of that DMB have reported. This makes the trailer describe the whole event.

## The CRC-22 of the DMB data

`crc22_64` advances a 22-bit CRC by one 64-bit word per clock. Its serial
form is a shift-right register:

* data bit 0 enters first;
* feedback = CRC[0] xor data bit;
* the feedback enters bit 21 and is XORed into bit 20.

This is the bit-reversed form of x²²+x+1. The parallel equations are
derived from that loop in a function, so no table is needed.

The register is cleared after each DMB trailer 2. The trailer carries the CRC
as {bits 26:16 = CRC[21:11], bits 10:0 = CRC[10:0]}.

## FMM status

`fmm[3:0]` is registered, so it follows its sources one clock later:

| bit | meaning | set by | cleared by |
|---|---|---|---|
| 0 | busy | L1A FIFO busy; also while reset or not started | follows its source |
| 1 | warning | L1A FIFO warn | follows its source |
| 2 | lost sync | DMB L1A mismatch | sync reset |
| 3 | error | L1A-FIFO overflow, input FIFO overflow, or special-bit error (held in `sticky_err`) | hard or soft reset |

## JTAG user registers

The JTAG controller gives `drck`, `update`, `sel2`, `dvcenb`, `shift` and
`tdi`, and an 8-bit user instruction (`instr`). `jtag_instr_decode` knows
opcodes 0…34 and the register length of each.

All registers shift LSB first: `tdo` is bit 0, and `tdi` enters the top bit.

* **Status reads** (`jtag_status_reg`). One 32-bit capture/shift register
  serves all status instructions. The instruction selects what is captured:
  * 2: L1A number
  * 3, 4, 5: DDU status
  * 6: output status
  * 9: full flags
  * 10: CRC errors
  * 11: timeouts
  * 15: DMB errors
  * 25: live fibers
  * 28: largest readout time
  * 32: board ID
  * 34: occupancy
* **Loadable registers** (`jtag_load_reg`). Each has a capture/shift
  register on `drck` and a holding register loaded on `update`.
  * Kill register: 20 bits, instructions 13 (read) and 14 (load), reset
    value all ones.
  * BX-per-orbit limit: 12 bits, instructions 29 and 30, reset value 3563.
* **Kill register meaning** (`kill_reg`). A 0 kills a path.
  * Bits 14:0 enable the fibers.
  * Bit 15 enables the check-disable bits.
  * Bits 16–19 disable the ALCT, TMB, CFEB and DMB checks.
* **Occupancy** (`occupancy_monitor`).
  * 15 fibers × 4 boards = 60 scalers of 32 bits in one RAM.
  * A count is read on one clock and written back incremented on the
    next (even/odd cycles).
  * Here board 0 counts DMB headers, and board 1 counts headers whose CFEB
    DAV bits are non-zero.
  * Instruction 34 reads the scalers in a loop. Each capture steps to the
    next scaler (address = fiber·4 + board).

## GbE spy link

`gbe_packetizer` drives a 1000BASE-X transceiver with two characters per
62.5 MHz clock: `txd[7:0]` first, with `txk` marking K characters.

* **During reset** it sends SYNC ordered sets (K28.5 D21.5 / K28.5 D2.2).
* **Otherwise** it sends IDLE (K28.5 D16.2).
* **Frame start.** A frame starts when the spy FIFO holds data. Between
  frames it waits 1280 clocks (20.48 µs), unless the FIFO's almost-empty
  flag is inactive.
* **Frame contents**, in order:
  * start and preamble;
  * four 0xFF destination bytes;
  * the 64-bit words, most significant byte first;
  * zero fill to at least 56 bytes;
  * a 16-bit packet number;
  * the Ethernet CRC-32;
  * /T/R/.
* **Frame end.** A frame ends at the end of an event, when the FIFO runs
  empty, or after 8960 data bytes. The largest event, about 30 000 words,
  therefore needs 27 frames.

## Where this design makes its own choices

The functions, codes, bit positions and numbers above follow the DDU
control-FPGA documentation. Where that documentation is silent, choices were
needed:

* **Top-level wiring.** There is no top-level block diagram. The input bus
  layout, the 16-word input FIFO, the one-event-at-a-time readout FSM, the
  valid/ready output handshake and the three-clock trailer hold are this
  design's own.
* **L1A FIFO.** Its depth (256) and warn/busy thresholds are chosen here.
* **Trailer bits.** The DDU-status bit positions in T-1 and the EOF-status
  bits in TR are this design's choice.
* **BX orbit length.** Two values appear in the source material: 924 (923)
  for the SPS test beam, and 3563 for the LHC. This design uses 3563.
* **DMB word codes.** The codes (9/A/F/E) and the place of the CRC in
  trailer 2 follow the CMS DMB format.
* **CRC-16 details.** The CRC-16 bit order and start value are chosen here.
* **Fiber LEDs.** The blink rate is bit 21 of a counter, about 10 Hz.
* **Not modelled:**
  * the CFEB CRC-15, whose polynomial is not given;
  * the wide custom gate macros, which are written as plain logic where
    needed;
  * the transceivers;
  * the DLL/clock-buffer tree;
  * the input FPGAs' own FIFOs.

## Files

* `rtl/ddu_pkg.sv`: shared constants, CCB codes, JTAG opcodes, header and
  trailer structs.
* `rtl/ddu5ctrl_top.sv`: the top level. The other `rtl/` files are its
  blocks, one module per file.
* `tb/tb_<block>.sv`: a self-checking testbench for each block.
  `tb/dmb_tb_pkg.sv` builds DMB events with a reference CRC-22.
* `tb/tb_ddu5ctrl_top.sv`: the end-to-end test at full size (15 fibers,
  256-entry L1A FIFO). It runs in a few seconds. It takes the FPGA through:
  * JTAG register access;
  * an L1A-FIFO overflow and a soft reset;
  * normal, back-pressured and close-L1A events;
  * a CRC error, and an L1A error followed by a sync reset;
  * a no-data event, a start timeout, a calibration start timeout (with
    its JTAG toggle) and an end timeout;
  * a killed fiber;
  * Track-Finder mode, fake and JTAG L1As;
  * occupancy readout;
  * the documented event sizes (210, 410, 414 and 814 words, and 30 066
    words);
  * the GbE spy path.

  Each mechanism is counted, and one that never happens fails the test.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops.

## Simulating

With Verilator 5, for example for the top:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ddu5ctrl_top \
  -Irtl -y rtl -y tb +libext+.sv rtl/ddu_pkg.sv tb/dmb_tb_pkg.sv \
  tb/tb_ddu5ctrl_top.sv -o sim
./obj_dir/sim
```

For another block, replace the top module and testbench names. Add
`tb/dmb_tb_pkg.sv` only for testbenches that import it: `tb_dmb_check` and
the top.

The default parameters are those of the real board:

| module | parameter | default |
|---|---|---|
| `ddu5ctrl_top` | `NFIB` | 15 |
| `ddu5ctrl_top` | `L1A_DEPTH` | 256 |
| `close_l1a_monitor` | `PIPE` | 40 |
| `event_timeout` | `START_TO` | 128 |
| `event_timeout` | `CAL_START_TO` | 288 |
| `event_timeout` | `DONE_TO` | 38914 |
| `gbe_packetizer` | `WAIT_CLKS` | 1280 |
| `gbe_packetizer` | `MAX_BYTES` | 8960 |
| `gbe_packetizer` | `MIN_BYTES` | 56 |

Some block testbenches override parameters to stay short, for example
`fiber_led` with `DIV = 4`.
