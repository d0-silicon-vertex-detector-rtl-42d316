# Port Card control logic for the D0 silicon vertex detector

The D0 silicon vertex detector is read out by SVX-II chips, 128 channels each. A
flex circuit (the HDI) carries a string of three to ten chips, and each HDI
shares one eight-bit bus. The Port Card sits about thirty feet from the
detector, between the chips and the counting room, and does two jobs:

* it **obeys a slow serial control link**. A 53 Mbit/s optical stream from the
  readout controller carries one seven-bit packet per beam-crossing slot
  (132 ns). The Port Card turns each packet into the mode lines, control byte
  and clocks that put the chips through acquisition, digitization and readout;
* it **ships the chips' data out**. During readout the HDI buses feed two
  G-Link serialisers, each taking two HDIs as one 16-bit word per 18.8 ns
  clock. That gives 1.062 Gb/s per fibre back to the readout board.

This repository holds synthesizable SystemVerilog for all the logic of one
Port Card: the control-link front end, the two state machines, the data and
clock multiplexers, the preamp-reset pulse former, the digitization counter,
the bus buffers and the VME interface that downloads the chips' settings. The
optical parts, the G-Link chips, the level translators and the analog delay
lines are bought parts. Their logic-level signals are ports of the top module.

## Structure

```
port_card            one board: N_PCE Port Card Equivalents + VME download interface
├── vme_download     VME writes -> one serial bit per HDI, DTACK is the download clock
└── pce  (x N_PCE)   one Port Card Equivalent: 4 HDIs, 2 G-Links
    ├── epld         all control logic, on the 53 MHz link clock
    │   ├── packet_shifter   7-bit serial-to-parallel register
    │   ├── sync_fsm         framing-bit tracking and resynchronisation
    │   ├── packet_latch     holds the 6 bits after the framing bit; crossing pulse
    │   ├── parity_check     per-packet parity
    │   ├── code_decoder     4-bit code -> 12 control lines
    │   ├── master_fsm       error reports, G-Link relock, diagnostic modes
    │   ├── main_fsm         SVX-II sequencing (76 states)
    │   ├── preamp_pulse     preamp-reset width from an external delay line
    │   ├── data_mux         control byte / diagnostic state / error byte
    │   └── clock_mux        crossing, single, 53 MHz, 26.5 MHz or download clock
    ├── dig_counter  divide-by-256 digitization counter, settable end
    └── hdi_bus_switch  tri-state buffers: EPLD or chips drive each HDI bus
```

`pc_pkg` holds the control-code enum, the decoded-line struct and the packet
struct. Every file opens with a comment on what it does, its interface and
timing, and which choices are its own.

## The control link

The link is two fibres: a 53 MHz square wave used as the clock, and NRZ data.
Packets follow each other with no gap:

| bit on the wire | meaning |
|---|---|
| 0 | framing bit, always 1 |
| 1 | crossing bit: this slot may hold a beam crossing |
| 2..5 | control code, most significant bit first |
| 6 | parity (this design: even parity over bits 1..6) |

At 132 ns bunch spacing every packet has the crossing bit. At 395 ns, one
packet in three has it. The control codes:

| code | command | code | command |
|---|---|---|---|
| 0000 | idle | 0110 | reset Port Card |
| 0001 | acquisition | 1001 | diagnostic mode 0 |
| 0011 | digitize | 1011 | diagnostic mode 1 |
| 0010 | readout | 0111 | digitize test pulse |
| 0101 | reset preamp | 1100 | power-up sequence |
| 0100 | read status (decoded, no action) | 1111 | G-Link loss of lock |

A decoded command stays valid for a whole packet time (seven clocks). The
state machines read commands as levels.

### Keeping framing

`sync_fsm` has a working loop of seven states. Its last state is the clock in
which the next framing bit is due. In that state it strobes the packet latch:
the shift register then holds the crossing bit, the code and the parity of
the packet just received. If that framing bit is 1, the loop repeats. If it
is 0, the machine leaves lock (`sync` falls) and enters a fixed run of 30
states. That gives the loss-of-synch report time to reach the readout board,
and the board time to answer with a string of zeroes. After the run it hunts,
and takes the next 1 it sees as a framing bit. Reset starts in the hunt state,
so power-up uses the same sequence. The scheme cannot tell a true framing bit
from any other bit that happens to be 1 every seventh clock. A changing code
stream exposes a false lock quickly.

## Sequencing the chips: `main_fsm`

Every state lasts one 18.8 ns clock. The chips' set-up and hold rules are met
by chains of states. The state is a seven-bit number (hex below). The same
number is what the diagnostic mode sends out.

| states | branch | what the chips see |
|---|---|---|
| 00 | idle | control byte 71; leaves on download, power-up, acquisition, digitize, readout or test-pulse |
| 01-03 → 04 | acquisition set-up, then run | CH_MODE/MODE0 steps; in 04 each crossing pulses the SVX-II clock |
| 05-0F → 04 | preamp reset loop (from 04) | byte 7D; bit 0 is the reset, shaped by the delay line |
| 10-33 | pipeline readout (digitize from 04) | crossing clock stops; 8 single clocks in three groups; bytes 78/70/30/38 |
| 34-3B | digitization | MODE1+MODE0; from 36 the 53 MHz clock goes to chips and counter; 3B waits for the counter's carry |
| 3C | digitized | waits for the readout code |
| 3D-3F | readout set-up | DAV with Port Card ID bytes (parameters, default AA, BB) in 3E, 3F |
| 40 | readout | bus released to the chips, 26.5 MHz clock, priority-in; ends when every HDI has shown priority-out |
| 41-42 | readout end | back to idle |
| 43-44 | initialize (download) | held while the VME interface asks for it; the HDIs get the download clock |
| 45-47 | power-up | after the power-up code, waits for an idle code, then two closing states |
| 48-49 | test pulse | calibration-inject byte F6, then the digitization sequence |
| 4A, 4B | digitize / readout from idle | one set-up state each |

The clock enables (`enacro`, `ena53`, `ena26`) are registered. They take
effect one clock after the state that asks for them. The mode lines, the
control byte, `smclk`, DAV, bus enable and priority-in are decoded from the
state register. So the ID bytes go onto the G-Link inputs during the two
clocks before the chips' first data can arrive.

The digitization counter is loaded with `count_preset` while idle and counts
the same 53 MHz clocks the chips get. Its carry comes 255 - preset clocks
after counting starts. With the two clocks of enable latency, the chips
receive 257 - preset clocks.

## Errors, relock and the remote logic analyser: `master_fsm`

* **Parity error** (not during readout): NOTIFY switches the bus byte to
  `000000 1 0`. One clock later CAV makes the G-Links send it as a control
  word.
* **Loss of synch**: the same, with byte `000000 0 1`. If the chips are reading
  out, the report waits until readout ends. The machine then waits for the
  link to regain lock.
* **G-Link loss of lock**: the readout board repeats code 1111 until its
  receiver relocks. Meanwhile ED (enable data) is low, so the transmitter
  sends its locking pattern, and the main machine is held in reset.
* **Diagnostic mode 0/1** is latched by its code and cleared by the reset code.
  The bus byte becomes `0, state[6:0]`, and the buffers of one HDI pair (one
  G-Link) stay driven even in readout. So the readout board sees the main
  machine's state on every clock, while the other G-Link still carries chip
  data. The state byte also replaces the ID bytes in diagnostic mode.

## Buses, clocks and G-Links

`hdi_bus_switch` models the tri-state buffers and transceivers as
multiplexers. Each HDI bus carries the EPLD byte when its pair is enabled, and
the chips' data otherwise. G-Link *k* takes HDI 2k as its low byte and
HDI 2k+1 as its high byte. `clock_mux` gates the 53 MHz clock with enables
sampled on the falling edge, so each gated pulse is a full high phase. It
divides by two with a toggle flip-flop for readout, and in initialize mode it
passes the download clock. During readout the chips put a byte out on both
edges of the 26.5 MHz clock, which is one byte per G-Link word.

## Downloading the chips: `vme_download`

Each chip takes 182 configuration bits through a serial chain, so a ten-chip
HDI takes 1820 bits. The VME interface is write-only:

| address | content |
|---|---|
| `BASE_ADDR` | bit 0: download enable; puts every main machine in initialize mode |
| `BASE_ADDR+1` | bit *i*: next bit for HDI *i* (8 HDIs on a two-PCE board) |

The data bits reach the HDIs one board clock before DTACK. DTACK of a data
write is the chains' clock. Software has to collate the eight bit streams into
words. At 200 ns per VME transfer, a full 1820-bit download takes about
0.36 ms.

## Departures and open points

These are choices made where the original description gives only the
function or leaves a detail open. Each file's header says which parts are its
own.

* Parity sense (even), the reset values, and the bit positions of the error byte (bit 1
  parity, bit 0 synch) follow the selector equations or are chosen here.
* The synchroniser uses the fixed 30-state run of the detailed description.
  It does not count the sixteen zeroes mentioned in the summary.
* After digitization the machine waits for a readout code in state 3C. One
  passage says readout follows digitization directly.
* The test-pulse branch goes 00 → 48 → 49 → 34 (digitize). The mode bits in
  the two ID states are kept from state 3D.
* The exact cycles of NOTIFY/CAV within an error report are this design's
  choice. The G-Link flag input (FF) is never driven high and is omitted.
* Priority-out is remembered per HDI during readout, so chains that finish
  at different times all count.
* The main machine is reset by the board reset, the reset code and G-Link
  relock. How the reset code and relock connect to it is this design's reading.
* The preamp-reset shaper is `request AND NOT delayed request`; its width is
  the external delay and must be shorter than the 11-state loop (207 ns).
* Not built: the VME destructive readback of downloaded data, and the
  alternative MIL-STD-1553 download path. Read status (0100) is decoded and
  brought out, but nothing acts on it.
* Timing closure at 53 MHz has not been checked in any device.

## Simulation

Every block has a self-checking testbench `tb/<block>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The testbench helpers are:

* `sar_link_model`, the control-link sender, with tasks to queue packets,
  bad parity, a missing framing bit or zeroes;
* `svx_hdi_model`, one HDI's chips in readout.

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/pc_pkg.sv tb/port_card_tb.sv --top-module port_card_tb -o sim
./obj_dir/sim
```

`port_card_tb` runs the top at its default size (two PCEs, eight HDIs). It
goes through lock, power-up, a 1820-bit download into all eight chains,
acquisition at 132 ns and 395 ns spacing, preamp reset, digitization, readout
with data checked byte by byte on the G-Link words, and a parity error. It
then covers a missing framing bit with resynchronisation, diagnostic mode
during readout, the reset code, G-Link relock and the test-pulse sequence.
It counts each of these and fails if one never happened. It runs in a few
seconds. The block testbenches check the block rules: the exact resync
length, the eleven-state reset loop, the 36-state pipeline readout with eight
clocks, the counter carry for several presets, the error-report cycles,
exhaustive decode and parity, and random multiplexer and bus tests.

The parameters are the Port Card's own numbers: `N_PCE=2`, `N_HDI=4`,
`PKT_LEN=7`, `RESYNC_LEN=30`, an 8-bit counter, and ID bytes AA and BB.
Changing `RESYNC_LEN` or the ID bytes needs no other edit. The HDI count
is fixed at four by the two-HDIs-per-G-Link pairing.
