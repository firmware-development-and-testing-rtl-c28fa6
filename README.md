# IBL read-out unit: BOC-ROD pair and Program Reset Manager

The Insertable B-Layer (IBL) of the ATLAS pixel detector is read out by
pairs of VME boards. A **BOC** (Back Of Crate card) holds the optical
links to the front ends. A **ROD** (Read-Out Driver) builds events out of
the front-end data. One pair serves 16 detector modules, which means 32
FE-I4 front-end chips. Each chip sends 8b/10b-coded data at 160 Mb/s,
so a pair takes in 32 × 160 Mb/s = 5.12 Gb/s. Fifteen pairs read out
the whole layer from a single crate.

This repository contains synthesizable SystemVerilog for the logic of one
pair:

* the **BOC transmit path**: trigger and configuration commands at
  40 Mb/s, bi-phase-mark encoded, with a per-link coarse delay;
* the **BOC receive path**: 8b/10b decoding, with four links multiplexed
  onto each 12-bit, 80 MHz BOC-ROD bus;
* the **ROD master**: trigger source selection, the L1ID/BCID counters,
  the front-end command serialiser and the event queue;
* two **ROD slaves**: they gather hit records, cross from 80 to 40 MHz,
  build event fragments with header and trailer, keep a debug copy of
  the raw input and fill a calibration histogram;
* the **Program Reset Manager (PRM)**: a small FPGA on the ROD. It lets
  the VME master program the other FPGAs over JTAG, even on all boards at
  once through a broadcast address. It can also check and reset the
  board's clock PLL through that PLL's JTAG port;
* the **IEEE 1149.1 test logic** (TAP controller, boundary-scan cells,
  instruction/bypass/IDCODE/boundary registers). It is used as the JTAG
  port of the PLL.

Processors, memories, the TIM, the S-Link cards and the PLL's analogue
core are not part of the logic. Their signals are ports of the top level.

## Block map

```
                 clk160                 clk80                       clk40
FE-I4 x32 ──► dec_8b10b ×32 ─► boc_rx_mux ×8 ─► bus[8] ─┬► rod_slave 0 (bus 0-3) ─► fragments 0
                                                       └► rod_slave 1 (bus 4-7) ─► fragments 1
                                                             ▲ event record
TIM / PPC ─► trigger_processor ─► event_processor ───────────┘
                     │ lv1_req
                     ▼
              fe_cmd_processor ─► bpm_encoder ─► coarse_delay ─► TX ×16
VME, front panel ─► prm ─┬► fpga_tck/tms/tdi ×3    (slave A, slave B, ROD controller)
                         └► pll_tck/tms/tdi ─► jtag_bscan_device (PLL JTAG port) ─► RESET, REFSEL
```

`ibl_readout_top` wires all of this together. Every port is a plain
signal or array.

| Clock | Use |
|---|---|
| `clk40` | ROD logic, trigger and command path, EFB, histogrammer |
| `clk80` | 8b/10b decoders, BOC-ROD buses, gatherers, Inmem FIFO |
| `clk160` | TX bi-phase-mark encoding and coarse delay |
| `osc_clk` | PRM PLL sequencer (100 MHz internal oscillator) |

The 40/80/160 MHz clocks are assumed to come from the same PLL and to be
phase-aligned. Only the PRM crosses between unrelated clocks. The slaves
cross 80 → 40 MHz through Gray-pointer FIFOs.

## Data path: from a front-end symbol to an event fragment

**Decoding (`dec_8b10b`).** Each link delivers one 10-bit symbol per
strobe, with bit 9 = `a`. The decoder:

* splits the symbol into 6b and 4b sub-blocks and looks each up in a
  table;
* recognises K.28.x and K.x.7;
* tracks running disparity, starting at RD−;
* flags `code_err` for an illegal sub-block and `disp_err` for a
  disparity violation.

K.28 codes that start from RD+ have their 4b part inverted before the
lookup. Output comes one cycle after the symbol.

**Bus multiplexing (`boc_rx_mux`).** Four decoded channels share one bus
word:

| Bit | 11 | 10 | 9:8 | 7:0 |
|---|---|---|---|---|
| Field | K-word | valid | channel | byte |

At 16 MB/s per link, four links use 64 of the bus's 80 M words/s. Each
channel has a 4-entry queue served round-robin. Idle K.28.1 words are
dropped. A lost byte sets a sticky `overflow`.

**Backplane lines.** The eight buses cross between the cards on 96
lines, `RXDATA[95:0]`. Buses 0-3 come from the BOC's south main FPGA and
buses 4-7 from the north one. The north half uses the same pattern as
the south half, shifted up by 48 lines. The field positions are not
contiguous:

| Bus (south / north) | Data | Address | Valid | Control |
|---|---|---|---|---|
| 0 / 4 | 7:0 | 9:8 | 10 | 11 |
| 1 / 5 | 35:28 | 37:36 | 38 | 39 |
| 2 / 6 | 19:12 | 41:40 | 43 | 42 |
| 3 / 7 | 27:20 | 45:44 | 47 | 46 |

For buses 2/3 and 6/7, valid and control swap places. The package
functions `line_data_lsb`, `line_addr_lsb`, `line_valid` and `line_ctrl`
encode this table. The top level packs the BOC-side bus words into
`RXDATA` and unpacks them on the ROD side.

**Gathering (`rx_gatherer`).** It follows each of the four channels of a
bus separately. A front-end frame is assumed to be:

1. start-of-frame K.28.7 (0xFC);
2. any number of 3-byte FE-I4 data records
   `{col[6:0], row[8:0], ToT[3:0], ToT2[3:0]}`;
3. end-of-frame K.28.5 (0xBC).

Every completed record becomes a 28-bit `rec_t`
`{type, channel, hit}`. Hits have type 1. The end of a frame gives a
type-2 record, which tells the fragment builder that the channel is
complete for this event.

**Clock crossing (`dual_clock_fifo`).**
* 64 records per bus.
* Binary and Gray pointers; each Gray pointer crosses through two
  flip-flops.
* First-word-fall-through read side.
* `full` and `empty` are conservative: each may lag the other side by
  two cycles.

**Fragment building (`efb`).** The master's event processor offers an
event record `{L1ID[23:0], BCID[11:0], type[7:0]}` to both slaves. It
removes the record only when both have taken it. For each event a slave
writes:

| Word | Content | ctrl |
|---|---|---|
| header 0 | `0xEE1234EE` | 1 |
| header 1 | `{8'h00, L1ID}` | 0 |
| header 2 | `{12'h000, BCID, trigger type}` | 0 |
| data | `{3'b001, link[4:0], col, row, ToT, ToT2}` | 0 |
| trailer | `{8'hE0, timeout, data word count[22:0]}` | 1 |

* Buses are emptied in order 0, 1, 2, 3.
* Within a bus, words keep the order in which records completed on the
  bus.
* A bus is done when every enabled link (`link_en`) has sent its
  end-of-frame. Records of disabled links are read and discarded.
* If a bus brings nothing for `TIMEOUT` (4096) cycles while a link is
  still missing, the bus is given up and the trailer's timeout bit is
  set. Without this, one dead front end would stop the whole ROD.
* The control bit plays the role of the S-Link control/data flag.
* There is no back-pressure from the output. The EFB writes at most one
  32-bit word per 40 MHz cycle (160 MB/s).

**Debug copy (`rod_slave`, Inmem FIFO).** The raw words of one selected
bus (`inmem_sel`) are stored in a 1024-word FIFO. A controller can read
them to see the input before it reaches the gatherer.

**Calibration histogram (`histogrammer`).**
* The data words of one selected link (`histo_link`) update a per-pixel
  memory of the FE-I4 matrix (80 × 336 pixels). The word for a pixel is
  `{occupancy[15:0], ToT sum[19:0]}`, at address `col*336 + row`.
* The update is a two-stage read-modify-write. When a hit follows on the
  same pixel, it takes the value still being written (forwarding). This
  way a hit can be accepted every cycle.
* Reading shares the read port when no hit arrives, with one cycle of
  latency.
* `clear` zeroes the memory, one word per cycle (26,880 cycles).

## Trigger and command path

**`trigger_processor`.**
* `use_tim` selects the TIM's Level-1 accept or a software trigger from
  the controller.
* BCID counts the 40 MHz bunch clock. It wraps after 3564 bunches and is
  cleared by BCR.
* L1ID counts triggers. ECR makes the next trigger get L1ID 0.
* Each trigger pulses `lv1_req` in the same cycle and presents the event
  record one cycle later.

**`fe_cmd_processor`.** Produces one serial bit per 40 MHz cycle.
* An LV1 request sends the 5-bit FE-I4 trigger pattern `11101` at once.
  A slow command in progress finishes first, and up to 15 pending
  triggers are counted so none is lost.
* Slow commands (configuration) are `slow_len` bits of `slow_cmd`, sent
  MSB first after a valid/ready handshake.

**TX encoding (`bpm_encoder`, `coarse_delay`).** The stream is sent to
every enabled TX link (`tx_en`). Each bit lasts four 160 MHz cycles. The
line toggles at every bit boundary and once more in the middle of a 1.
This keeps the line DC-balanced and lets the front end recover the clock.
A per-link shift register of 32 taps at 160 MHz adds a coarse delay of
0 to 31 × 6.25 ns, so links of different lengths can be aligned.

## Program Reset Manager

The PRM is the one device on the ROD that is reachable over VME before
anything else is configured. Its clock comes from the board PLL.

**VME slave (`vme_slave`).**
* A24 accesses (AM 0x39/0x3D) are decoded. The board is selected by
  A[23:16] = `board_addr`, and A[7:2] picks a 32-bit register.
* Address strobe and data strobes pass through two flip-flops.
* Broadcast address 0x25:
  - a write through it is taken and acknowledged (DTACK*) by every PRM
    in the crate;
  - a read through it is refused with BERR*, because several boards
    would otherwise drive the bus.
* An assertion checks that DTACK* and BERR* are never both active.

**Registers (`prm`).**

| Index | Name | Access |
|---|---|---|
| 0 | CTRL | W: [0] start PLL reset, [1] start clock check, [3:2] FPGA chain, [4] clear FIFO, [5] front-panel chain mode. R: [3:2], [5] |
| 1 | STATUS | R: [0] REFSEL, [1] REFSEL valid, [2] PLL sequencer busy, [3] PLL RESET held, [4] JTAG player busy, [15:8] PLL resets done |
| 2 | PROG_DATA | W: JTAG word `{TMS[15:0], TDI[15:0]}` |
| 3 | FIFO_STATUS | R: [15:0] fill, [16] empty, [17] full |
| 4 | TDO | R: last 16 TDO bits, bit 15 newest |
| 5 | WORDS | R: JTAG words played |

**FPGA programming (`sync_fifo`, `jtag_programmer`).**
* The VME master fills a 512-word FIFO with JTAG words.
* The player shifts the 16 TMS/TDI bit pairs of each word, LSB first,
  onto the selected chain: 0 = slave A, 1 = slave B, 2 = ROD controller.
* TCK is `clk`/`TCK_DIV`. TMS/TDI change while TCK is low, and TDO is
  sampled on the rising edge.
* Unselected chains are parked with TCK low and TMS high.
* Writing PROG_DATA through the broadcast address programs every ROD in
  the crate at once. Fill levels must be polled per board.

**Front-panel chain.** CTRL bit 5 puts the PRM in front-panel mode. It
joins slave A, slave B and the ROD controller into a single JTAG chain
that a cable on the PRM's front-panel connector (`fp_*`) can reach:

```
fp_tdi → slave A → slave B → controller → fp_tdo
```

TCK and TMS go to all three FPGAs. The VME player is disconnected while
this mode is on.

## Recovering the board clock: the PLL JTAG sequencer

This is the least obvious part of the design. The ROD's clock PLL
selects its reference with a REFSEL pin: the clock from the BOC, or a
local oscillator. A stuck PLL is recovered by asserting its RESET input.
Neither pin is wired to an FPGA. Both are reached only through the PLL's
boundary-scan chain. And the PRM's own clock comes from that PLL, so
logic on the PRM clock would freeze at the moment it holds the PLL in
reset.

`pll_jtag_ctrl` therefore runs on the PRM's **internal oscillator**
(100 MHz) and divides it to a 1 MHz TCK. Start requests from VME cross
into that domain as toggles through three flip-flops. Results come back
through two.

**Clock-source check:**
1. Five TMS=1 clocks to Test-Logic-Reset, then to Run-Test/Idle.
2. Instruction scan of SAMPLE/PRELOAD (0x1C), 8 bits, LSB first.
3. Data scan of the boundary-scan register. The bit at `REFSEL_BIT`
   is the REFSEL pin and is kept in STATUS.

**PLL reset:**
1. Test-Logic-Reset.
2. Instruction scan of INTEST (0x2C).
3. Data scan with a 1 in the `RESET_BIT` cell. From the next Update-DR,
   the boundary cell drives the PLL core's RESET input.
4. `RESET_US` = 2000 µs (2000 TCK periods) in Run-Test/Idle.
5. Instruction scan of SAMPLE/PRELOAD, which gives the core back its
   pins.
6. A data scan that also re-reads REFSEL.

TMS/TDI change on the falling TCK edge and TDO is sampled on the rising
edge. The sequencer counts completed resets.

**The PLL's test logic** is modelled by `jtag_bscan_device`:
* `jtag_tap_ctrl`: the standard 16-state TAP controller;
* an 8-bit instruction register. It captures `0x01`, and a shadow copy
  updates on the falling edge of Update-IR;
* bypass and 32-bit IDCODE registers. IDCODE is the instruction after
  Test-Logic-Reset;
* a boundary-scan register of `boundary_scan_cell`s. Each cell is a
  capture/shift flip-flop plus an update stage on the falling edge.
  In INTEST the core side sees the update stage instead of the pin.
* optional output cells (`N_OUT`, zero for the PLL). They sit on the
  TDI side of the input cells and capture what the core drives.

The device decodes these instructions:

| Code | Instruction | Register between TDI and TDO | Effect on the pins |
|---|---|---|---|
| 0x00 | EXTEST | boundary scan | output pins driven by the update stage |
| 0x1C | SAMPLE/PRELOAD | boundary scan | none; the core and the pins talk normally |
| 0x2C | INTEST | boundary scan | core inputs and output pins driven by the update stage |
| 0x16 | IDCODE | identification | none |
| 0x17 | USERCODE | identification, loaded with `USERCODE` | none |
| 0x20 | CLAMP | bypass | output pins held at the update stage |
| 0x18 | HIGHZ | bypass | output enable low |
| 0xFF and any other code | BYPASS | bypass | none |

The all-zeros EXTEST and all-ones BYPASS codes come from the standard.
SAMPLE/PRELOAD and INTEST are the codes given for the PLL. The IDCODE, USERCODE, CLAMP and HIGHZ codes are this design's choice.
RUNBIST is not built because it needs a self-test of the core, which
this model does not have. Its code falls into the BYPASS row.

In the top, pin 0 of this device is the REFSEL switch and core-side
output 1 is the PLL RESET.

## Where the design makes its own choices

The text describes what the blocks do, and for the JTAG parts how. It
leaves most formats open. The following are choices of this design:

* **Counter widths**: 24-bit L1ID, 12-bit BCID, 8-bit trigger type.
* **Formats**: the front-end frame format, the fragment word layout
  (markers 0xEE1234EE and 0xE0), and the LV1 bit pattern.
* **PRM**: the register map and the JTAG word format.
* **Boundary-scan layout**: register length 8, REFSEL at bit 0, RESET at
  bit 1.
* **Command fan-out**: one command stream is broadcast to every enabled
  TX link. There are no per-module command streams.
* **Debug and calibration taps**: the Inmem FIFO records one selected
  bus rather than all four. The histogrammer covers one selected link
  with an on-chip memory; the original keeps histograms in external
  SSRAM.
* **EFB timeout**: the end-of-frame timeout and its trailer flag.
* **Buffer depths and delay taps**: FIFO depths (64, 512, 1024, 16),
  the 4-entry bus queues, and 32 coarse-delay taps.

Known limits:

* An EFB sustains 40 M words/s, about half of what 16 links could deliver
  if all of them sent hits continuously. Real occupancies are far lower.
  The FIFOs absorb bursts.
* The fine TX delay, the processors (PowerPC, MicroBlaze, DSP), SSRAM,
  Ethernet, the BOC control FPGA's Wishbone/Setup-Bus, the TIM and the
  S-Link cards are not implemented. Where they would connect, their
  signals are top-level ports.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  rtl/ibl_pkg.sv -y rtl -y tb tb/tb_efb.sv --top-module tb_efb
./obj_dir/Vtb_efb
```

`tb_ibl_readout_top` runs the full-size top level, with default
parameters: 32 links, 16 TX lines and the full 2 ms PLL reset. It takes
a few seconds. It acts as TIM, controller, front ends and VME crate, and
covers:

* TIM triggers, ECR, and triggers from the controller;
* 91 events of random hits on all 32 links, checked word-for-word in
  both fragment streams;
* decoding of the TX lines;
* a slow command;
* a dead link (timeout) and a bad 10-bit symbol;
* histogram and Inmem readout;
* VME access, broadcast write and refused broadcast read;
* FPGA programming words;
* the clock-source check and the timed PLL reset.

It counts each of these mechanisms and fails if one never happens.

Testbenches need no data files. All stimuli are generated with
`$urandom`, and every value the simulator reads is reset or initialised.
