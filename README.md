# DDU5 central control FPGA

A Detector-Dependent Unit (DDU) of the CMS cathode strip chamber (CSC) read-out
collects, for every Level-1 Accept (L1A) of the trigger, the data that up to 15
DAQ motherboards (DMBs) send over optical fibers. It checks the data and ships
it on as one event with a DDU header and trailer. The board has input FPGAs that
receive and buffer the fiber data. It has one *control* FPGA that runs the
read-out. This repository is SystemVerilog for that control FPGA. It is written
from the original schematic book (version 56 of the DDU5 control FPGA, a Xilinx
Virtex-II Pro design with a 40 MHz read-out clock).

The control FPGA has five jobs:

- It numbers the L1As and tags each with its bunch crossing, flagging L1As that
  come close together.
- It waits until the input FIFOs of all live fibers hold the event, or gives up
  after a timeout.
- It reads the merged 64-bit data stream and frames it as a DDU event.
- It checks the stream and reports the result on the 4-bit FMM (fast
  merging module) status lines.
- It copies the event to a Gigabit-Ethernet spy link. All internal state can be
  read over a user JTAG path.

## How one L1A becomes an event

```
 L1A ─► close_l1a_monitor ─► L1A queue ─► fifo_ready ─► ddu_event_builder ─► OUT_D
        (40 BX pipe,         (16 deep,    (all live       (H1 H2 H3 data      │
         close flag,          warn at 12)   inputs ready,   T-2 T-1 TR)        ▼
         BXN-40)                            or timeout)         ▲          external FIFO
 bx_counter ──┘                                                 │               │
                    IN_DDR ─► ddr_in36 ─► checks ───────────────┘               ▼
                                          (special word, CRC-22, stuck,      gbe_tx ─► GbE
                                           occupancy)
```

1. **Bunch crossing and close L1As** (`bx_counter`, `close_l1a_monitor`). The
   BX counter runs from 0 to the orbit limit (3563 by default; loadable over
   JTAG) and restarts on BC0. Every L1A is delayed 40 BX (1 µs). If another L1A
   enters the pipe while one is in it, the delayed one leaves with bit 12
   ("close L1A") set. Its BXN is corrected back by 40, wrapping over the orbit
   end when the BXN is below 40.
2. **L1A queue** (inside `ddu_event_builder`). Each delayed L1A is queued with
   its 24-bit L1A number and 13-bit {close, BXN}. The queue asks for the FMM
   warning state when 12 of its 16 entries are used.
3. **Waiting for data** (`fifo_ready`). The oldest L1A raises WAIT_START. The
   block registers ONE_RDY (some live input has the event) and ALL_RDY (every
   live input has it). DATA_READY is ONE_RDY·ALL_RDY, or a latched start
   timeout:
   - 128 clocks = 3.2 µs normally;
   - 288 clocks = 7.2 µs in calibration mode.

   The timeout records which live inputs were missing and forces the event out
   with the data that did arrive. If no fiber is live at all, the event is ready
   at once and goes out as an empty event. While the event is read, an end timer
   (38914 clocks, about 972 µs) watches for a read that never finishes.
4. **Reading** (`ddu_event_builder`). The builder samples which live fibers have
   data (DAV) and sends H1, H2 and H3. If any fiber has data, it raises IN_REN
   and forwards every valid input word until one carries the *last* flag. Then
   it sends T-2, T-1 and TR. OUT_STOP (output FIFO near full) holds the
   header/trailer sequence and drops IN_REN. Words already in flight are still
   written, which the near-full margin absorbs.

## The DDU event format

Each event is a sequence of 64-bit words:

| word | contents (bit 63 on the left) |
|---|---|
| H1  | `5` · `1` (event type) · L1A number[23:0] · BXN[11:0] · source ID[11:0] (760) · format version (6) · flags (bit 0 = close L1A) |
| H2  | `8000 0001 8000` · {0, DAV[14:0]} |
| H3  | {0, LIVE[14:0]} · output status[15:0] · {0, start-timeout fibers[14:0]} · `00` · number of DAV fibers · FMM |
| …   | DMB data words as received |
| T-2 | `8000 FFFF 8000 8000` |
| T-1 | status[31:0] · fibers with warnings[15:0] (missed the start timeout) · fibers with errors[15:0] (special-word or trigger-CRC error) |
| TR  | `A` · `0` · word count[23:0] · CRC-16 · status[7:0] · FMM · `0` |

An event without data has 6 words. The word count includes all six DDU words.
The CRC-16 uses the polynomial x¹⁶+x¹⁵+x²+1 in reflected form (0xA001),
starts at zero and covers H1 to T-1. The output status in H3 is:

{special bits 15..12, NOT_READY, ALL_RDY, ONE_RDY, queue empty, 0000, OUT_FULL,
OUT_STOP, queue almost full, queue full}

## The input bus

The input FPGAs deliver 72 bits per clock over a 36-pin double-data-rate bus.
`ddr_in36` takes bits [35:0] on the falling edge and bits [71:36] on the rising
edge, and presents the 72-bit word after the rising edge. Bits [63:0] are the
DMB data word. The upper byte is sideband, with this layout:

| bit | meaning |
|---|---|
| 64 | word valid |
| 65 | last word of the event |
| 66 | trigger (ALCT/TMB) data word |
| 67 | trigger trailer; its bits [21:0] hold the CRC-22 of the trigger words before it |
| 71:68 | fiber number |

A read enable (IN_REN) in one cycle gives a word on the bus in the next. This
sideband layout is this design's own; the original splits the control bits
between the input FPGAs differently.

## Checks, error registers and FMM

- **Special-word consistency** (`special_word_check`, built from `anyorall`).
  A DMB word carries bits 12..15 four times, once in each 16-bit quarter.
  Each bit is voted two-or-more-of-four. An `anyorall` detector flags quarters
  that disagree ("not all, but some"). A disagreement is an error for the
  event's fiber.
- **Trigger-data CRC** (`crc22_64`). Trigger words are folded into a 22-bit CRC,
  64 bits per clock. The CRC is compared with the value in the next trigger
  trailer, then cleared. Only the equations of four CRC bits survive in the
  schematics. The generator used here reproduces all four: a serial LFSR,
  LSB-first, shifting right, with the feedback entering bit 21 and XORed into
  bit 20.
- **Stuck data**: a valid input word while no event is being read.
- **Timeouts**: start and end, from `fifo_ready`.
- **Fiber status change**: the fiber-OK pattern differs from the one latched
  at start-up.

Error register A holds the following bits. It is kept in three `sticky_flags`
copies and read through the `vote3` majority voter.

| bit | meaning |
|---|---|
| 0 | stuck data |
| 1 | start timeout |
| 2 | end timeout |
| 3 | trigger CRC error |
| 4 | special-word error |
| 5 | fiber change |
| 6 | L1A queue full |
| 7 | occupancy update dropped |

Register B holds the start-timeout fibers. Register C holds the fibers with
special-word errors.

`fmm_ctrl` turns this into the FMM state:

| bit | state | when set | cleared by |
|---|---|---|---|
| 0 | busy | not ready, or L1A queue full | — |
| 1 | warning | L1A queue almost full, with 16-clock hysteresis | — |
| 2 | lost sync | stuck data or timeouts | resync |
| 3 | error | special-word error, trigger CRC error or fiber change | hard reset |

Before start-up ends the state is busy.

A resync does not act at once. It waits until the DDU is empty, meaning every
L1A received so far has left as an event. A counter of L1As in flight (in the
40-BX pipe, in the queue or being built) decides this. Lost sync is therefore
cleared only after the events that were already on their way are complete.

## Live fibers and the kill register

`kill_ctrl` holds the 20-bit kill register:

| bits | meaning |
|---|---|
| 14:0 | fiber enables |
| 15 | check-disable enable |
| 16 | ALCT |
| 17 | TMB |
| 18 | CFEB |
| 19 | DMB |

A zero kills; reset loads all ones. Eight clocks after reset the fiber-OK
pattern is latched and SYSTEM_RDY rises. LIVE = latched fiber OK AND the kill
bits 14..0. Only live fibers are waited for and read.

## Occupancy counters

`occupancy_monitor` counts, per fiber, how often each of its four boards (DMB,
ALCT, TMB, CFEB) sent data: 60 counters of 32 bits in one memory. An update
reads and then writes each board's counter: reads on even cycles, writes on odd
cycles, 8 cycles per fiber. The top decides which boards were present from each
fiber's data block:

- DMB: always;
- ALCT: after one trigger trailer;
- TMB: after two trigger trailers;
- CFEB: when the block has more than the four DMB header and trailer words.

JTAG opcode 34 reads the counters in a loop. Each capture shows the current
counter and steps to the next.

## Gigabit-Ethernet spy path

`gbe_tx` runs at 62.5 MHz and reads complete events from an external FIFO.
Each packet is built as follows:

1. It starts once 20.48 µs (1280 clocks) have passed since the last packet, or
   at once if the FIFO reports it is not almost empty.
2. The transmitter sends preamble and start byte (7×`55`, `D5`), four `FF`
   bytes, the event words (most significant byte first), `FF` fill up to 64
   data bytes, a 16-bit packet number, the Ethernet CRC-32, and `/T/R/`.
3. During reset it sends SYNC ordered sets; between packets it sends IDLE
   (K28.5 D16.2).
4. An event always ends a packet. An event longer than 8960 bytes continues in
   the next packet.

The FPGA writes that FIFO itself (`GBE_FIFO_WEN`) with the same words it sends
to the output. While the `GLOBAL_RUN` input is high, it leaves out events that
carry no data (the 6-word events), so the spy link shows only events with data.
The S-Link output always gets every event. The document says only that the GbE
skips empty events for global runs; how a global run is selected is not given,
so here it is an input pin.

## Board switches

With switch 6 on (`SW_GBE_TEST`), the GbE path sends test packets in place of
events. Each packet carries one 64-bit counter word, and the counter steps by
one per packet. The packet pacing is unchanged. The counter format is this
design's choice; the document says only "send counter on GBE link".

With switch 7 on (`SW_FAKE`) and switch 8 off, the TTC L1A and BC0 are ignored.
In that mode only L1As sent over JTAG (opcode 33) make events. With switch 8 on,
the TTC inputs work as usual. The original also blocks the TTC event-counter
reset; this design has none.

While switch 8 is on, the DAV LEDs show the firmware version (56, in binary).

## JTAG register map

`jtag_ctrl` decodes an 8-bit instruction register (the first 36 opcodes). It
has a 32-bit capture/shift data register, shifted LSB first. Loads take the last
N bits shifted. The BSCAN primitive is outside this RTL; its SEL1/SEL2/
CAPTURE/SHIFT/UPDATE/TDI/TDO strobes are top-level ports sampled by the 40 MHz
clock.

| op | function |
|---|---|
| 0 | no operation |
| 1 | reset everything except JTAG while selected; follow with a NOOP |
| 2 | L1A number |
| 3–5 | status word (32/16/16 bits) |
| 6 | output status |
| 7 | latched fiber OK |
| 10 | fibers whose trigger data failed the CRC-22 check (sticky) |
| 13 / 14 | read / load kill register (20 bits) |
| 16 / 17 | fibers with a TMB / ALCT CRC error (sticky; on each fiber the first trigger trailer of an event is the ALCT's, the second the TMB's) |
| 22–24 | error registers A, B, C |
| 25 / 26 | live / latched fiber-OK masks |
| 29 / 30 | load / read BX per orbit (12 bits) |
| 31 | toggle calibration auto-L1 (enabled after reset) |
| 32 | source ID |
| 33 | one L1A from VME |
| 34 | occupancy counters, looping |
| 35 | per-fiber error sum (start timeouts, special-word and CRC errors) |

The other opcodes read zero. Their sources are checks done in the input FPGAs,
which this FPGA does not hold.

## Design choices and departures

The following are this design's own choices, made where the schematics leave
the point open:

- **Field contents.** The contents of the status fields (H3 output status, T-1
  status, TR status) and the bit order of error register A.
- **Sizes.**
  - L1A queue: 16 deep.
  - Warning hysteresis: 16 clocks.
  - Start-up length: 8 clocks.
  - LED blink period: 2²³ clocks.
  - LED DAV hold: 2²⁰ clocks.
- **Start timer with no input ready.** The start timer also runs when *no* live
  input has data. An L1A whose data never comes therefore still yields an
  (empty) event instead of blocking the queue.
- **Orbit length.** The default orbit is the LHC one, 3563. The schematics also
  carry the SPS value of 923 (924 crossings), which can be loaded over op 29.
- **GbE packets.** Packets are limited to 8960 data bytes. A smaller 7952-byte
  limit from an earlier version is not used. The short-packet fill goes to a
  64-byte minimum with `FF` bytes, and carries no separate byte count.
- **CRC-16 initial value.** The CRC-16 starts at 0. The USB-style start value
  0xFFFF and final inversion are not used.
- **Occupancy updates.** Back-to-back updates closer than 8 clocks drop the
  second update. Dropping is flagged in error register A bit 7. Real DMB blocks
  are far longer than 8 words.

## Not included

The following parts are not in this RTL:

- the RocketIO transceivers, clock managers and BSCAN primitive (vendor hard
  macros; their signals are ports);
- the external FIFO chips;
- the DCC/S-Link output protocol (preamble and force-idle logic);
- the CFEB CRC-15 check, whose equations are not fully given;
- the mode-bit switches 1 to 5, whose effects are not described, and the
  VME source of fake L1As (here fake L1As come over JTAG);
- the detailed per-chamber DMB/CFEB format checks (L1A and DAV comparisons, DMB
  timeouts, word-count checks), which run in the input FPGAs.

## Files

All modules are in `rtl/`, one per file, and share `ddu_pkg.sv` (JTAG opcodes,
FMM bits, 8b/10b codes, event markers and the CRC next-state functions). The
hierarchy:

```
ddu5ctrl
├── jtag_ctrl
├── kill_ctrl
├── bx_counter
├── close_l1a_monitor
├── fifo_ready
├── ddr_in36
├── special_word_check ── anyorall ×4
├── crc22_64
├── occupancy_monitor
├── sticky_flags ×3 ── vote3
├── fmm_ctrl
├── ddu_event_builder ── crc16_64
├── fiber_led
└── gbe_tx
```

Every module has a testbench `tb/tb_<module>.sv`. Each one:

- is self-checking, comparing against independent models (for example, a
  bit-serial CRC-22, a byte-wise CRC-16/CRC-32, and a software queue of the
  expected event words);
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

`tb/tb_ddu5ctrl.sv` runs the whole FPGA at its default parameters. It plays the
TTC system, the input FPGAs on the DDR bus, the output and GbE FIFOs, and a
JTAG master. It checks 26 of its events word by word. It makes each of
the following happen at least once, and fails if one never does:

- close L1As;
- a start timeout;
- output stops;
- good and bad trigger CRCs;
- a special-word error;
- stuck data;
- the FMM warning, lost-sync and error states and their resets;
- JTAG loads and the JTAG reset;
- occupancy updates;
- empty events;
- GbE packets;
- empty events left out of the GbE copy during a global run;
- a resync held back until the DDU is empty;
- an L1A with every fiber killed;
- fake-L1A mode, where a TTC L1A is ignored and a JTAG L1A is read out;
- GbE test packets carrying a counter that steps by one.

`tb/tb_ddu5ctrl_workloads.sv` sends events of the sizes the DDU format is
quoted for. It checks each one arrives whole, with the right word count, and in
the right number of GbE packets:

| event | words | GbE packets |
|---|---|---|
| no data | 6 | 1 |
| one DMB with one CFEB of 8 samples | 210 | 1 |
| 15 DMBs with one CFEB each | 3066 | 3 |
| 15 DMBs with five 16-sample CFEBs each (the largest event below the 30070-word limit) | 30066 | 27 |

The word count is 6 + 25·samples·CFEBs + 4·DMBs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ddu_pkg.sv tb/tb_ddu5ctrl.sv --top-module tb_ddu5ctrl
./obj_dir/Vtb_ddu5ctrl +verilator+rand+reset+2
```

Replace `tb_ddu5ctrl` with any other testbench name to test one block. The
end-to-end test takes a few seconds. The testbenches pass with random initial
register values (`+verilator+rand+reset+2`).
