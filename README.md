# Micro-network on chip with a 10-Gb/s serial link

On-chip buses run out of bandwidth once many IP blocks share one chip. A micro-network on chip
(MNoC) replaces the bus with small packet switches. Each IP attaches to the local port of a switch,
and the switches form a mesh. Where two groups of switches are far apart, a parallel 32-line
connection costs too much wiring. A serial link is used instead: it turns the 32-bit words at
312.5 MHz into one 10-Gb/s bit stream and back.

This RTL describes the test chip for that idea. It holds:

- two five-port switches;
- a 10-Gb/s transceiver between them, with an all-digital data recovery;
- the test logic that lets a tester observe the chip through one data input pin and one data
  output pin.

```
 data_in ─┬─► 1-to-32 SR ───────────────────────────┐
          │                                          ▼
 start ─► PG ──► upper switch ─► D ─┬──────────► [TX mux] ─► transceiver ─► serial_out
          │      (N in, E out)      │                        (serializer)
          └──────────────► D ──┐    │                        (data recovery) ◄─ serial_in
                               ▼    ▼                                │
                           [lower mux] ◄─── BA ◄─── D ◄──────────────┘
                              │  ▲ └──────────────────── raw received words
                              ▼  
                              D ─► lower switch ─► [out mux] ─► data_out (bit 31)
                                   (W in, E out)       ▲
                              lower mux output ────────┘
```

The 3-bit `test_mode` sets the three multiplexers. In the main mode (`M_LINK_FULL`) the pattern
generator's packets follow this path:

1. They enter the north port of the upper switch and leave through its east port.
2. They cross the serial link.
3. The byte aligner re-frames them.
4. They enter the west port of the lower switch and leave through its east port.
5. Bit 31 of that east output drives `data_out`.

## Packets and flits

A flit is one 32-bit word. A packet is one header flit followed by `len` payload flits. The
header layout is this design's own:

| bits   | field | meaning                                         |
|--------|-------|-------------------------------------------------|
| 31     | gs    | 1 = guaranteed service (GS), 0 = best effort (BE) |
| 30:27  | dst_x | destination column                              |
| 26:23  | dst_y | destination row (north is +1)                   |
| 22:16  | —     | reserved; passed through unchanged               |
| 15:0   | len   | number of payload flits after the header         |

Routing is XY (dimension order): first east/west until the column matches, then north/south,
then local. Each switch's coordinates are the parameters `MY_X` and `MY_Y` (`mnoc_switch`). On
the test chip the upper switch is at (0,0) and the lower at (1,0). The pattern generator
addresses (2,0), so both switches send its packets east.

## The switch (`mnoc_switch`)

There are five input modules, five output modules and a 5x5 crossbar. Ports are numbered N=0,
E=1, W=2, S=3, L=4 (`mnoc_pkg::port_e`). Every link is a 32-bit flit bus with valid/ready. A
flit moves in a cycle in which both are high.

**Input module.** The input controller expects a header first. It reads the class and the
length, and computes the output direction. It then writes the header and every payload flit of
that packet into the GS or BE queue. Each queue entry carries head/tail marks and the
direction. Between packets the VC arbiter offers the crossbar the head of the GS queue if there
is one, and the BE queue otherwise. So a GS packet overtakes BE packets that arrived earlier at
the same port. Once a packet's header has crossed, the arbiter stays with that queue until the
tail. Flits of two packets never interleave.

**Crossbar arbitration.** There is one arbiter per output. This is the distributed part of the
scheme, and it makes each arbitration small. A free output is granted round-robin through a
mask circuit:

- the mask keeps only the requesters numbered above the last winner;
- the lowest of those wins;
- if none of them is requesting, the lowest unmasked requester wins.

Every waiting input therefore gets its turn. The output then belongs to that input until the
packet's tail flit has passed.

**Output module.** Each output module is a two-entry buffer with a valid/ready handshake
towards the next switch. Its `in_ready` depends only on its own fill level. A stall therefore
travels back one switch per cycle, and no combinational ready path runs through a chain of
switches. That is how this design implements the handshaking unit that keeps the network free
of deadlock loops.

**Timing.** A flit offered at an input in cycle t is on the output in cycle t+2. Each port
moves one flit per cycle, which is 32 bits × 312.5 MHz = 10 Gb/s.

Queue depths are parameters: `BE_DEPTH` = 4 and `GS_DEPTH` = 2. Two entries are enough for one
flit per cycle.

## The serial link (`transceiver`)

### Time base

The link logic runs on one fast clock, `clk_os`, with 8 ticks per 100-ps unit interval (UI),
so one tick is 12.5 ps. One 32-bit word spans 256 ticks. In silicon, a PLL supplies a 2.5-GHz
clock in eight phases, 50 ps apart, which is two phase edges per UI. In this model every fourth
tick is one of those phase edges. The ticks in between give the delay line its fine steps.
`ser_clkgen` counts the ticks and decodes everything else:

- the UI slot;
- the edge-sample phase (tick 0 of each UI) and the data-sample phase (tick 4);
- the lane step (every 4 UI);
- the word boundary;
- the 312.5-MHz `clk_word`. It rises halfway through each word, well away from the word
  boundary where the two domains exchange data.

The rest of the chip runs on `clk_word`.

### Transmitter

Four `ser_8to1` lanes each load eight bits of the word: lane j takes bits j, j+4, …, j+28.
They shift out one bit every 2.5-GHz period. `ser_4to1` then picks lane 3, 2, 1, 0 in the four
UI of each period, through two levels of two-input multiplexers (a tree). Words leave MSB
first.

### Receiver

1. The serial input passes the delay line `dcdl`, whose delay is set by a 4-bit code in
   12.5-ps steps.
2. In each UI, `phase_detector` samples the delayed data at the edge phase and at the data
   phase. If the data changed and the edge sample still shows the old value, the data is late
   (`dn`). If the edge sample already shows the new value, the data is early (`up`).
3. `cdr_ctrl` (the CC & FSM block) filters these decisions and moves the code:
   - a signed accumulator steps the code when it reaches ±threshold;
   - in ACQUIRE the threshold is 1;
   - after four reversals of direction the FSM enters TRACK, raises `cdr_locked` and uses the
     programmable threshold `track_th`.
4. The loop settles with data transitions on the edge phase, so the data phase sits in the
   middle of the eye.
5. Four `deser_1to8` lanes collect the data samples. At each word boundary they are assembled
   into `rx_word`.

The receiver does not know where the transmitter's words begin. `rx_word` is therefore the
sent stream rotated by an arbitrary number of bits.

### Byte aligner (`byte_align`)

The aligner keeps the previous received word. It looks for the 32-bit training preamble
(`link_pkg::PREAMBLE` = `F5A09C63`) in all 32 windows of {previous, current}. When the
preamble appears at the same offset in four consecutive words, that offset is adopted. It is
replaced only if the preamble shows up four times in a row at another offset.

The link carries only the 32 data lines, with no valid line. So the test chip transmits the
preamble whenever the upper switch has nothing to send (idle fill). The aligner marks preamble
words not valid, so packets arrive at the lower switch with their framing intact. This also
means the aligner trains itself from the idle link after reset. The pattern generator's
preamble phase guarantees at least 64 idle words before the first packet.

One limitation follows from the idle fill: a payload word equal to the preamble would be dropped
on the link. With the pattern generator's payload (a data bit plus 31 PRBS-31 bits), that
happens for about one flit in 2^31. An IP that must send arbitrary words needs an escape code or
a valid line on top of this link.

## Test chip (`mnoc_link_chip`)

| mode | name          | path                                                         |
|------|---------------|--------------------------------------------------------------|
| 0    | `M_SW_UPPER`  | PG → upper switch → data_out                                  |
| 1    | `M_SW_LOWER`  | PG → lower switch → data_out                                  |
| 2    | `M_SW_CHAIN`  | PG → upper switch → lower switch → data_out                   |
| 3    | `M_TRX_RAW`   | data_in → 1-to-32 SR → link → data_out (no alignment)         |
| 4    | `M_LINK_RAW`  | PG → upper switch → link → data_out (no alignment)            |
| 5    | `M_LINK_BA`   | PG → upper switch → link → BA → data_out                      |
| 6    | `M_LINK_FULL` | PG → upper switch → link → BA → lower switch → data_out       |
| 7    | `M_PG_ONLY`   | PG → data_out                                                 |

**Pattern generator (`pattern_gen`).** A rising edge on `start` begins a run:

1. `NPRE` cycles of training preamble.
2. Packets back to back while `start` stays high. Each is a header plus `NDATA` payload flits.
3. Each payload flit is `{data_in, PRBS-31}`, so the data pin travels in bit 31, the bit that
   `data_out` shows. The bit is taken from the pin itself, not through the 1-to-32 SR; that
   is the same bit one cycle earlier.

**1-to-32 SR (`sr_1to32`).** The shift register slides one bit per cycle. In mode 3 `data_out`
therefore repeats `data_in` after a fixed latency. The latency depends on the rotation the link
happens to introduce.

**Fixed port settings.** The link cannot stall, so the upper switch's east output and the lower
switch's east output are always ready. Switch ports that the chip does not use are idle.

**Local ports.** The local ports of both switches are top-level ports (`up_local_*`,
`lo_local_*`). This is where network interfaces and IP blocks would attach.
Since the link cannot stall, the lower switch's west input must never be refused. So traffic
from the lower local port must not use the east output while link traffic does, and packets
for the lower local port must be taken without stalls. The assertion `a_link_no_loss` flags a
link word that would be lost.

**Reset.** `rst_n` is asynchronous. `clk_word` stays low while it is asserted, so the
word-rate registers see no clock edge during reset. In simulation, drive `rst_n` from 1 to 0:
if it starts at 0 there is no falling edge and those registers keep their initial values.

**Pins.** `serial_out` and `serial_in` are the logic-level ends of the LVDS driver and of the
receiver pre-amplifier. Loop them back through a delay to test the link.

## What is not in the RTL

- **PLL.** A self-calibrated multi-band ring-VCO PLL is analog. Its output is stood for by
  `clk_os`.
- **LVDS driver and receiver pre-amplifier.** Both are analog. The pins `serial_out` and
  `serial_in` are their logic-level ends.
- **Delay line.** `dcdl` is a behavioural model: a tapped shift register on the fast clock, not
  a chain of delay cells.
- **Scrambler and framer.** The parallel scrambler and framer that could sit in front of the
  serializer are not included. Their polynomial and frame format are unknown. In the test chip,
  framing is done by the preamble and the byte aligner.
- **Network interface.** The network interface between an IP and a local port is not included.

## Choices of this design

These points are left open by the architecture and were decided here. All of them can be
changed without touching the rest of the design:

- the header layout and XY routing;
- the queue depths;
- holding an output for a whole packet;
- the valid/ready protocol and the two-entry output buffer;
- the round-robin mask rule;
- the bang-bang phase detector, the loop-filter thresholds and the lock rule;
- the 16-tap delay line;
- the preamble value, the four-match lock rule and the idle fill;
- the PRBS-31 polynomial, `NPRE` = 64 and `NDATA` = 1024;
- the list and encoding of the eight test modes;
- the lane mapping of the serializer.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/mnoc_pkg.sv rtl/link_pkg.sv \
    tb/tb_mnoc_link_chip.sv -y rtl --top-module tb_mnoc_link_chip -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The two packages must come first.

`tb_mnoc_link_chip` runs the whole chip at its default parameters, in a few seconds of wall
time. It loops `serial_out` to `serial_in` through a random delay of 40 to 120 ticks (the
plusarg `+line_dly=N` fixes it). All eight modes run, each after a reset:

- **Upper switch, link with aligner, PG only (modes 0, 5, 7).** The word in front of the lower
  switch must be the pattern generator's flit stream.
- **Lower switch and switch chain (modes 1, 2).** The packets must leave the lower switch.
- **Transceiver with the shift register (mode 3).** `data_out` must repeat `data_in` at one
  fixed latency.
- **Raw link (mode 4).** With the link idle, every received word must be the preamble at one
  fixed rotation.
- **Full link (mode 6).** A GS packet is injected at the upper switch's local port while the
  pattern generator's stream holds the east output.

A reference model records every flit entering the upper switch. It checks every packet leaving
the lower switch flit by flit, and checks `data_out` against the selected word. Each pattern
generator packet must leave the lower switch at one flit per cycle, which is 10 Gb/s, also
after crossing the serial link. The testbench also requires each of these events to occur at least once:

- delay-code steps;
- CDR lock;
- aligner lock;
- dropped idle words;
- crossbar contention;
- pattern-generator stalls;
- mode changes.

`tb_transceiver` checks the following:

- the received bit stream equals the sent one at a constant bit delay over 300 words;
- the loop tracks a drifting line: the line delay steps 3 ticks one way and back, the delay
  code follows, and the bit stream stays intact for another 300 words;
- the serial output changes only on UI boundaries;
- the word clock period is 256 ticks (10 Gb/s at 312.5 MHz).

`tb_mnoc_switch` runs random traffic in both classes on all five ports, with random output
stalls. It checks:

- routing, packet integrity and order per class;
- the two-cycle latency;
- one flit per cycle.
