# EAXFP: ten Gigabit Ethernet lanes on one XGMII

This RTL implements an EAXFP (Ethernet aggregation to XGMII framing
procedure) framer. The framer lets a 10 GbE line card use cheaper network
processors. Three network processors, each with four GMII ports, together
drive ten 1 Gb/s GMII lanes. The framer joins those ten lanes into one
10 Gb/s XGMII toward the 10 GbE PHY, and splits the received XGMII stream
back over the ten lanes. The far end sees one 10 GbE port, and no lane is
tied to a MAC address or a flow.

The core problem is frame distribution: how to merge ten independent frame
streams into one, and split one stream back into ten, without reordering
or duplicating frames. The framer uses **padding added round robin
(PARR)**:

1. **Frame composition.** Every frame is placed in a buffer slot sized for
   the largest Ethernet frame. On the line, every frame takes a slot of the
   same fixed length. The part of the slot that the frame does not fill is
   padding, sent as XGMII idle.
2. **Round-robin scheduling.** All slots have the same length, so a plain
   round-robin scheduler over the ten lanes is fair and needs no byte
   accounting. Frames leave in the order the scheduler visits the lanes.

## Block structure

```
 GMII tx lane 0..9 ──► Tx_DPRAM x10 ──► Frame Mux ───────┬──► Tx DDR ──► XGMII tx (32 bit DDR)
   (8 bit @125 MHz)    eaxfp_tx_dpram   eaxfp_frame_mux  │    eaxfp_tx_ddr
        ▲ gmii_tx_full                                    │
                                                          ▼ (local loopback)
 GMII rx lane 0..9 ◄── Rx_DPRAM x10 ◄── Frame Inverse ◄── Loop back ◄── Rx DDR ◄── XGMII rx
                       eaxfp_rx_dpram   Mux               eaxfp_loopback  eaxfp_rx_ddr
                                        eaxfp_frame_inv_mux

 Line card processor bus ◄──► eaxfp_cpu_if (control, lane enables, counters)
```

| Module | Role |
|---|---|
| `eaxfp_pkg` | XGMII control characters, the 64-bit word type `xgmii64_t`, Gray-code functions |
| `eaxfp_framer` | top level; the ten lanes are a `generate` loop |
| `eaxfp_tx_dpram` | per-lane transmit buffer: GMII to XGMII form, frame slots, clock crossing |
| `eaxfp_frame_mux` | PARR round-robin scheduler, builds the transmit stream |
| `eaxfp_tx_ddr` | 64-bit SDR word to 32-bit DDR XGMII |
| `eaxfp_rx_ddr` | 32-bit DDR XGMII to 64-bit words, moves a lane-4 `/S/` to lane 0 |
| `eaxfp_loopback` | chooses between the line input and the local transmit stream |
| `eaxfp_frame_inv_mux` | hands received frames to the receive lanes in cyclic order |
| `eaxfp_rx_dpram` | per-lane receive buffer: frame slots, XGMII form back to GMII |
| `eaxfp_cpu_if` | register file for the line card processor |
| `eaxfp_dpram`, `eaxfp_sync` | helpers: dual-clock RAM with registered read, two-flop synchronizer |

## The transmit path in detail

### From GMII to a slot (`eaxfp_tx_dpram`)

Each lane writes its frame into the RAM as it arrives, already converted
to XGMII form. Bytes are packed eight to a 64-bit word, and lane 0 carries
the first byte:

* the first preamble byte becomes `/S/` (0xFB, control);
* a byte sent with `gmii_tx_er` becomes `/E/` (0xFE, control);
* after the last byte comes `/T/` (0xFD, control), and `/I/` (0x07,
  control) fills the rest of that word.

A slot holds `frame_words(MAX_FRAME)` = (8 + 1518 + 1 + 7) / 8 = 191
words. When `gmii_tx_en` falls, the lane commits the slot and records its
length in words. The slot count then reaches the XGMII clock domain as a
Gray-coded pointer.

GMII has no back-pressure, so two cases drop a frame whole:
* the frame starts while every slot is full;
* the frame grows past `MAX_FRAME + 8` bytes.

Each drop toggles `drop_toggle`, and the processor interface counts it.
`gmii_tx_full` shows the full condition to the network processor. This is
the framer's flow-control signal.

### The round robin (`eaxfp_frame_mux`)

The scheduler keeps the lane it served last. When a slot ends, it looks at
the lanes in cyclic order after that lane. It picks the first one that
holds a complete frame and is enabled. Idle lanes are skipped within the
same clock, so only backlogged lanes get line time. The chosen lane is
then read for exactly `SLOT_WORDS` clocks:
* words `0 .. len-1` come from its RAM;
* the remaining words are sent as idle. This is the padding; it is never
  stored.

All lanes share one read address. Data comes from the selected lane's RAM
one clock after the address, and is registered once more on the way out.

Timing at the default parameters:

| quantity | value |
|---|---|
| XGMII word | 64 bits per 6.4 ns (156.25 MHz, DDR) |
| slot | 192 words = 1536 byte times = 1.2288 us |
| round of ten slots | 12.288 us |
| one lane, maximum frames at 1 Gb/s | 1538 byte times (8 + 1518 + 12 gap) = 12.304 us |

Ten lanes running at line rate with maximum-size frames therefore fit,
with 16 ns to spare per round. A maximum-size frame leaves a 10-byte gap
(`/T/` plus nine idles) before the next slot.

Consecutive slots from different lanes follow each other with no gap. If
the same lane is picked twice in a row, it waits one idle clock so that
its buffer pointer can advance.

The price of PARR is paid with short frames. A 64-byte frame still takes
a full 1536-byte slot, so the whole line carries at most 0.814 million
frames per second. Ten lanes of minimum-size frames at full load would
need 14.88 million per second. Such traffic overflows the transmit
buffers, and the overflow is counted per lane.

### DDR output (`eaxfp_tx_ddr`)

This is the usual output-DDR cell: lanes 0-3 are driven while `xgmii_clk`
is high and lanes 4-7 while it is low. The clock drives the output
multiplexer on purpose. The 90-degree shift of the forwarded XGMII clock
belongs to the board-level clocking, outside this RTL.

## The receive path in detail

`eaxfp_rx_ddr` samples lanes 0-3 on the rising edge and lanes 4-7 on the
following falling edge. XGMII allows a frame to start on either half of a
64-bit word. When `/S/` arrives on lane 4, the stage switches to a
half-word shift and stays shifted until a start arrives on lane 0 again.
Each switch drops four bytes of inter-frame idle.

`eaxfp_loopback` passes either this line stream or the framer's own
transmit stream to the receive side. It changes source only between
frames.

`eaxfp_frame_inv_mux` gives each frame, whole, to the next receive lane
in cyclic order. A lane with no free slot is skipped, and so is a lane
disabled by the processor. Any lane can take any frame: the receive side
never looks at addresses. A frame is dropped, and counted, in three
cases:
* no lane can take it;
* receive is disabled;
* it is longer than a slot.

`/E/` characters are kept. On GMII, `eaxfp_rx_dpram` sends them with
`gmii_rx_er` high. It also turns `/S/` back into a preamble byte 0x55,
and keeps at least 12 idle clocks between frames.

## Clocks, resets and clock crossing

There are two clock domains, each with its own active-low reset:
* `gmii_clk` (125 MHz) is shared by all twenty GMII lanes;
* `xgmii_clk` (156.25 MHz) clocks the frame multiplexers, the DDR stages,
  the loopback and the register interface.

Reset is asserted asynchronously and must be released synchronously to
its clock. Only the DPRAMs cross between the domains. Each RAM is written
in one domain and read in the other. Slot pointers cross Gray-coded
through two flops. A slot's length register is written before its pointer
moves, so it is stable by the time the other side reads it. Transmit drop
events cross as toggles and buffer-full flags as levels, both
synchronized in `eaxfp_cpu_if`.

## Register map (`eaxfp_cpu_if`, word addresses)

The register bus is synchronous in the `xgmii_clk` domain. A write takes
effect at the clock edge. Read data comes with `cpu_ack` one clock after
the request.

| addr | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | rw | bit0 loopback, bit1 transmit enable, bit2 receive enable (reset 0x6) |
| 0x01 | TX_LANE_EN | rw | lanes in the transmit round robin (reset 0x3FF) |
| 0x02 | RX_LANE_EN | rw | lanes that receive frames (reset 0x3FF) |
| 0x03 | STATUS | ro | bits 9:0 transmit buffer full, bit16 receive alignment shifted, bit17 loopback active |
| 0x04 | RX_DROPS | ro | frames dropped on receive |
| 0x05 | RX_ERRORS | ro | frames received with an error character |
| 0x06 | CLEAR | wo | any write clears every counter |
| 0x10+i | TX_FRAMES[i] | ro | frames sent from transmit lane i |
| 0x20+i | RX_FRAMES[i] | ro | frames given to receive lane i |
| 0x30+i | TX_DROPS[i] | ro | frames dropped at transmit lane i |

The lane enables are how software handles a link change. When a GMII
link goes down, the software clears that lane's bit in TX_LANE_EN and
RX_LANE_EN, and the other lanes carry the traffic. A disabled transmit
lane keeps buffering until its slots are full, and then drops frames.

## Parameters of `eaxfp_framer`

| parameter | default | meaning |
|---|---|---|
| `LANES` | 10 | GMII lanes (at most 16) |
| `MAX_FRAME` | 1518 | largest frame in bytes, without preamble/SFD |
| `SLOT_WORDS` | 192 | slot length on the XGMII in 64-bit words; must exceed `frame_words(MAX_FRAME)` |
| `TX_SLOTS` | 4 | frame slots per transmit buffer (power of two) |
| `RX_SLOTS` | 4 | frame slots per receive buffer (power of two) |
| `GMII_IPG` | 12 | minimum idle clocks between frames on GMII receive |

At the defaults each lane buffer is a 1024 x 72-bit RAM, 20 in all.

## What follows the original scheme and what is this design's own

These points follow the published EAXFP scheme:
* the partition into transmit buffers, frame mux, frame inverse mux,
  receive buffers, DDR interfaces, loopback and processor interface;
* ten GMII lanes at 125 MHz and a 32-bit DDR XGMII at 156.25 MHz;
* frame slots sized for the largest frame, padding with idle, and a
  round robin that serves backlogged lanes in fixed order;
* received frames distributed to any lane.

The scheme gives no further detail, so the following are this design's
own choices:
* the 1518-byte maximum frame;
* the 192-word slot, chosen so that ten lanes at line rate fit;
* four slots per buffer;
* IEEE 802.3 clause 46 character coding and a 64-bit internal word;
* the lane-4 start alignment;
* the drop rules;
* switching loopback only between frames;
* the flow control, a full flag only (no PAUSE frames are generated);
* lane enables as the link-change mechanism;
* the register map and its simple synchronous bus (the line card
  processor itself reaches the card over PCI).

The original description gives the pad as the value 0x00000112. That
value is not an XGMII control code. This design pads with the standard
idle character `/I/` (0x07 with the control bit set) in every byte lane.
A 10 GbE PHY and any receiver treat that as inter-frame gap. No other
pad pattern is sent.

Not included: the network processors, the line card processor and its
PCI bus, the 10 GbE PHY (XGXS) and the switch fabric. They connect at
the top-level ports.

## Simulation

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. For example, to run the end-to-end test
at the default parameters:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/eaxfp_pkg.sv tb/tb_eaxfp_framer.sv --top-module tb_eaxfp_framer -Mdir obj -o sim
obj/sim
```

For a block testbench, substitute its name, for example `tb_eaxfp_frame_mux`.
The testbenches run their clocks at the 125 : 156.25 ratio, with periods
of 40 and 32 time units.

The end-to-end test `tb_eaxfp_framer` feeds the XGMII output back into the
XGMII input through a channel model. It can delay the stream by one
32-bit transfer, which moves frame starts to lane 4. The test sends 116
numbered frames; five are meant to be dropped and the other 111 must arrive. It makes each mechanism happen
at least once:
* padding of short frames;
* round-robin skip of idle lanes;
* transmit overflow with `gmii_tx_full`;
* transmit and receive lane disable;
* an error character;
* receive drop;
* lane-4 alignment;
* loopback;
* an oversize frame.

It checks:
* every frame against a scoreboard;
* per-lane order;
* that consecutive line frames go to consecutive receive lanes;
* that slots are never closer than 192 words;
* the register counters.

In its saturation phase, all ten lanes send four maximum-size frames
back-to-back at GMII line rate. All 40 arrive, no transmit buffer fills,
and the slots follow each other at exactly 192 words. The run takes a
few seconds.

`tb_eaxfp_throughput` holds the framer at full load for longer. All ten
lanes send 16 maximum-size frames each, back to back with the minimum
gap, and the line is looped back as above. Each frame is checked byte by
byte against the pattern it was sent with. The test also measures the
line rate and each frame's wait, from its last byte on GMII to its `/S/`
on the line. Results at the default parameters:
* offered load 9870.0 Mb/s of frames, carried 9870.8 Mb/s;
* all 160 frames delivered in order, and `gmii_tx_full` never raised;
* 144 of the 159 gaps between slots are exactly 192 words. The line is
  16 ns per round faster than ten fully loaded inputs, so once per round
  it waits for the next frames to finish;
* longest wait 11.1 us, against a bound of one round plus one slot
  (13.5 us).

## Limits

* The design has been verified only in two-state RTL simulation. Nothing
  has been tested in hardware or checked with static timing analysis. The
  falling-edge and clock-multiplexer paths in the DDR stages need
  device-specific I/O cells in a real FPGA.
* The framer does not check or regenerate the FCS. Frames pass through
  unchanged apart from the `/S/` and preamble mapping.
* The frame order across lanes is the order in which the scheduler visits
  them. The framer keeps no sequence numbers, so order is kept for the
  frames of one lane but not between frames sent at the same time on
  different lanes.
