# Optical Multiplexer Board logic: choosing the good copy of redundant fibre data

The TileCal front-end electronics sit inside the ATLAS detector, where radiation can corrupt
the data they send out. To survive this, every front-end channel is sent twice, over two
optical fibres carrying identical packets. The Read-Out Driver (ROD) accepts only one fibre
per channel. The Optical Multiplexer Board (OMB) sits in between. For every packet it
recomputes the CRC of both copies, compares each with the CRC the packet carries, and
forwards a copy that arrived intact. The board has a second job, the *data injection mode*.
There, it ignores the front end and sends test events from its own memory to the ROD, one
per trigger, so that RODs can be tested without a detector.

This repository holds synthesizable SystemVerilog for the digital part of the 9U version of
the board:

- eight channels of 2 × 16-bit inputs and one 16-bit output each, at 40 MHz;
- one "CRC FPGA" per channel;
- one "VME control FPGA" that the crate CPU talks to;
- a serial control bus joining the VME control FPGA to all eight CRC FPGAs.

The work split between the FPGAs, the data rates, the four trigger sources, the busy stop
and the kinds of registers follow the published description of the board. That description
gives what each part does but not how it is built. Everything inside the blocks is this
design's own choice. This includes the packet framing, the CRC polynomial, the buffering,
the serial bus protocol, the register map and the VME address map. The section
[Where this design chooses for itself](#where-this-design-chooses-for-itself) lists these
choices.

## Board structure

```
 fibre 2c   ─┐                                                  ┌─> tx_out[c]  (G-Link TX → ROD)
 fibre 2c+1 ─┴─> crc_fpga[c]  (c = 0..7) ──────────────────────┴─> pmc_out[c] (mezzanine)
                    ▲  trig[c]     ▲ serial bus (clock + 1..3 data lines, shared)
                    │              │
 VME bus ─────> vme_fpga ──────────┘
 NIM trigger ─>   vme_slave, local registers, sbus_master,
 ROD busy ────>   trigger_gen, trigger_ctrl, board reset
 TTC L1A ─────>
```

| module | role |
|---|---|
| `omb_top` | the board: 8 × `crc_fpga`, 1 × `vme_fpga`, resolution of the shared serial data lines |
| `crc_fpga` | one channel: two `crc_checker`s, four `sync_fifo`s, `fibre_selector`, `event_injector`, `sbus_slave`, registers |
| `crc_checker` | real-time CRC of one fibre's packets, verdict after the last word |
| `sync_fifo` | packet buffer (18 bits × 1024) and verdict queue (1 bit × 512) |
| `fibre_selector` | pairs the two copies, picks one, streams it out, discards the other |
| `event_injector` | event memory (16 bits × 1024) sent once per trigger |
| `sbus_slave`, `sbus_master` | the two ends of the serial control bus |
| `vme_fpga` | VME slave, local registers, trigger generation and selection, board reset, bus master |
| `vme_slave` | VME64 A32/D32 single-cycle slave |
| `trigger_gen` | periodic internal trigger |
| `trigger_ctrl` | source selection, busy veto, fan-out to channels |
| `omb_pkg` | shared types (`stream_t`), CRC function, register offsets |

All logic runs on one 40 MHz board clock. It uses an active-low asynchronous reset `rst_n`.

## Word streams and the packet CRC

A fibre delivers `stream_t` words: `valid`, `sop` (first word of a packet), `eop` (last
word) and 16 data bits. The last word of every packet is the CRC of all the words before it.
The CRC is CRC-16-CCITT: polynomial x¹⁶+x¹²+x⁵+1 (0x1021), start value 0xFFFF, data folded
in most significant bit first, one 16-bit word at a time, no final inversion. On bytes this is
the common "CCITT-FALSE" form: the byte string `"123456789"` gives 0x29B1. The polynomial and
start value are parameters of `crc_checker`. To match a particular front end, change them
there and in `omb_pkg` (`CRC_POLY`, `CRC_INIT`).

`crc_checker` keeps a running CRC of every word except the one marked `eop`. It compares that
word with the running value. It pulses `done` one clock after the `eop` word, with `ok` set
when the two match. A `sop` restarts the CRC, so a packet whose end was lost merges into the
next packet and fails its check. A packet must have at least two words.

## Choosing a fibre

This is the part of the design to understand first.

**Store and forward.** The verdict on a packet exists only after its last word, the CRC, has
arrived. By then the packet has already gone by. Each fibre's words are therefore written
into its own packet buffer as they arrive. Each verdict goes into a small queue of its own.
Nothing leaves the channel until both copies of a packet have been judged.

**Pairing.** When both verdict queues hold an entry, `fibre_selector` takes the oldest verdict
from each. These belong to the same packet. It picks:

1. fibre A if A's CRC is correct;
2. otherwise fibre B if B's CRC is correct;
3. otherwise (both copies bad) the preferred fibre, `CTRL[1]`, and counts a both-bad packet.

It then reads both buffers together, one word per clock. It sends the chosen copy to the
output and throws away the other. It goes back to pairing when both copies have been read up
to their `eop`. The two copies may arrive with any skew. The output runs at one word per
clock, the rate of the input links. Each packet therefore leaves in as many clocks as it has
words. Its first word leaves at most four clocks after the later copy ended, or right after
the previous output packet, whichever is later. If the next pair of verdicts is already queued
when a packet ends, the next packet starts on the following clock. So a channel keeps up with
packets that arrive back to back with no idle word between them.

**Lost copies.** Radiation can also stop a fibre entirely. If pairing just waited, a silent
fibre would block the good one. So when one verdict has waited `TIMEOUT` clocks (512 by
default, 12.8 µs) with nothing on the other side:

- the waiting copy is forwarded alone and a missing copy is counted;
- the silent fibre now *owes* one copy;
- while a fibre owes copies, each packet from the other fibre is forwarded as soon as its
  verdict arrives, with no further wait, and adds one to what is owed;
- each copy the owing fibre later delivers is taken to be a late copy and is dropped without
  output, one per copy owed.

So a dead fibre costs one timeout, not one per packet, and the channel keeps its full rate
on the other fibre. The default timeout is shorter than the 1024-word buffer, so even packets
arriving back to back do not overflow the buffer during the one wait. If the copies were only
late, dropping them puts the two fibres back in step. A fibre that died and later comes back
keeps being dropped, because it still owes copies. The channel then stays on the other fibre
until a board reset clears the buffers and the owed counts (VME register `0x10`, see below).
The reset is also the way out of any other disorder.

**Overflow.** A buffer holds 1024 words and a verdict queue holds 512 verdicts. A packet has at
least two words, so the verdict queue can never fill before its buffer. Words that arrive
when the buffer is full are dropped. The source of the packets is assumed
never to outrun the 40 MHz output for longer than this.

## Data injection mode

When `CTRL[0]` of a channel is set, the channel's output comes from `event_injector` instead
of the selector. The fibre path keeps running, checking and counting, but its output is not
used. The injector holds a 1024-word event memory. At power-up the memory holds a built-in
event: 15 words `0xA000 + i` followed by their CRC, 16 words in all. Words can be
overwritten over VME, and the length is set separately. Each trigger sends words
`0 .. length-1` with `sop` and `eop` in place, so the ROD sees an ordinary packet. Triggers
that arrive while an event is being sent are counted (up to 15) and served back to back.
The first word appears on the output three clock edges after the edge that samples the
trigger.

Triggers come from `trigger_ctrl` in the VME FPGA. It has four sources, each with an enable
bit:

- the external trigger input (NIM level, after level conversion);
- the internal periodic generator;
- a VME command (a write to register `0x0C`);
- the L1 accept of the TTC receiver chip.

External inputs pass through a two-flip-flop synchroniser and trigger on their rising edge.
With the busy veto enabled, a high ROD busy input blocks triggers, which stops the injection;
blocked triggers are counted. A channel mask chooses which CRC FPGAs receive each trigger.
An external edge reaches the channels 3 clocks later. An internal pulse reaches them 1 clock
later.

## Control: VME and the serial control bus

The crate CPU sees the board as a VME64 slave with 32-bit addresses and data. Only single
D32 cycles are answered: AM `0x09` or `0x0D`, `LWORD*` low, and `A[31:24]` equal to the
`board_base` input. Block transfers, interrupts and the VME64x configuration space are not
implemented. The strobes are synchronised to the board clock. The slave raises a request on
an internal register bus, pulls `DTACK*` low when the request completes, and releases it when
the data strobes rise.

| A[23:20] | target |
|---|---|
| 0 | VME FPGA local registers, offset `A[7:0]` |
| 1 … 8 | CRC FPGA of channel 0 … 7, register `A[12:2]`, over the serial bus |

VME FPGA local registers:

| offset | access | contents |
|---|---|---|
| 0x00 | R | board ID `0x04D8_0009` |
| 0x04 | R/W | `[3:0]` source enables {TTC, VME, generator, NIM}, `[4]` busy veto enable, `[15:8]` channel mask |
| 0x08 | R/W | generator period in clocks (reset value 4000 = 10 kHz) |
| 0x0C | W | one trigger (VME command) |
| 0x10 | W | reset the CRC FPGAs' data path for 16 clocks; their registers and event memories are kept |
| 0x14 | R | triggers issued |
| 0x18 | R | triggers blocked by busy |
| 0x1C | R | serial bus reads that got no reply |

CRC FPGA registers (serial bus addresses; from VME at `base | (ch+1)<<20 | addr<<2`):

| addr | access | contents |
|---|---|---|
| 0x000 | R/W | `[0]` injection mode, `[1]` prefer fibre B when both copies are bad, `[2]` write 1: clear counters |
| 0x001 | R/W | injection event length in words (default 16) |
| 0x002 / 0x003 | R | CRC errors seen on fibre A / B |
| 0x004 | R | packets forwarded |
| 0x005 | R | packets with both copies bad |
| 0x006 | R | copies missing (timeouts) |
| 0x007 | R | packets forwarded from fibre B |
| 0x400 + n | W | word n of the event memory |

**The serial control bus.** The CRC FPGAs sit in a column on the board. A bus clock and three
data lines run past all of them from the VME FPGA. Normally only line 0 is used; the other two
are there for more bandwidth. The parameter `SB_LANES` (`LANES` in the bus modules) sets how
many lines carry data: 1 by default, 2 or 3 to shorten each frame. The VME FPGA (`sbus_master`) generates the bus
clock, which is the board clock divided by two and always running. Bits are changed after the
bus clock falls and sampled while it is high. All devices share the board clock, so the
receivers treat the bus clock as a strobe. A frame with one data line, most significant bit first:

```
write:  1 | 0 | slot[3:0] | addr[10:0] | data[31:0]            49 bits, ~100 board clocks
read:   1 | 1 | slot[3:0] | addr[10:0]  … 2 idle … 1 | data[31:0]   (reply from the slave)
```

The leading 1 is a start clock with line 0 high. With L lines, the 16-bit header and the 32
data bits each go out L bits per bus clock, earliest bit on the highest line, padded with
zeros to whole clocks. With three lines a write is 1 + 6 + 11 = 18 bus clocks (40 board
clocks including the handshake) instead of 49.

The master lets go of the lines after a read header. The addressed `sbus_slave` answers after
two idle bus clocks, then lets go again. Slaves that are not addressed count the bits of the
frame and of the reply, so they never mistake a reply for a new frame. A read that gets no
start bit within 256 bus clocks returns `0xFFFF_FFFF` and is counted in register `0x1C`. In
`omb_top` each data line is the OR of every device's enabled output, which is 0 when nobody
drives, like the terminated board trace at rest. An assertion checks that no two devices
drive together. A VME access to a CRC FPGA holds the VME cycle until the frame is over: about
2.5 µs for a write and 2.8 µs for a read with one data line, and 1.4 µs for a write with three.

## Where this design chooses for itself

These points follow from what the board must do, but the published description does not
give them:

- packet framing (`sop`/`eop`, CRC as the last word) and the CRC-16-CCITT polynomial and start value;
- store-and-forward buffering, its depths (1024 words, 512 verdicts) and the drop on overflow;
- the preference order A, then B, then the programmable preferred fibre;
- the timeout and realignment rule for lost copies;
- the default injection event, the pending-trigger count and the periodic generator;
- the serial bus frame, the way bits are spread over several data lines, the bus clock rate,
  the reply timeout, and the wired-OR model of the shared lines;
- every register and address map above, the board ID and the board-reset length;
- VME: single D32 cycles only.

One point departs from a label in the board's block diagram. That diagram marks the link
between the VME FPGA and the CRC FPGAs as "32 bits at 40 MHz". The board's signal-integrity
study, by contrast, treats it as a serial bus with a clock and three data lines, of which one
is used unless more bandwidth is needed. This design builds the serial bus, with the number
of data lines in use as a parameter.

## Not in the RTL

- **G-Link serialiser/deserialiser chips (HDMP-1032/1034) and the optical transmitters and
  receivers.** The RTL starts at the receivers' 16-bit parallel output and ends at the
  transmitters' 16-bit parallel input. The G-Link control and flag signals are not modelled;
  `sop`/`eop` stand in for them.
- **TTCrx receiver chip and its control firmware.** Only its L1 accept output is used, as a
  trigger input.
- **PMC mezzanine connectors.** What a mezzanine would receive is not specified. `pmc_out`
  carries each channel's output stream.
- **Clock circuit, power conversion, NIM-to-TTL conversion, JTAG chain, PCB stack-up and bus
  termination.** These have no logic function.
- **The "configure for 16 to 8 or 16 to 4" option.** It appears as a note in the board's block
  diagram without further explanation and is not implemented.
- **80 MHz operation.** This is a clock target of the board; the RTL's timing has not been
  analysed.

## Simulating

Every `rtl/` module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
one `TB_RESULT checks=N failures=M` line. `tb/omb_tb_pkg.sv` holds a reference CRC written
independently of the design (byte-wise). `tb/vme_master.svh` and `tb/sbus_bitbang.svh` are
included bus-driver tasks. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/omb_pkg.sv tb/omb_tb_pkg.sv tb/tb_omb_top.sv --top-module tb_omb_top
./obj_dir/Vtb_omb_top
```

Replace `tb_omb_top` with any other testbench name.

`tb_omb_top` runs the whole board at its default size: 8 channels, 1024-word buffers and
event memories. It is controlled only over VME and takes a few seconds. It covers:

- all eight channels carrying packets at once, with random corruption of either copy;
- CRC errors on fibre A, on fibre B and on both;
- a lost copy and its timeout, then a board reset;
- a dead fibre, where only the first packet waits for the timeout;
- loading an event over VME;
- injection triggered by the VME command, the generator, the NIM input and the TTC input;
- the busy veto.

It counts each of these and fails if one never happened. The block testbenches cover each
module's corner cases and timing:

- `tb_crc_fpga`: skewed copies, back-to-back packets at the full word rate, the lost-copy
  timeout, channel reset, clearing the counters, injection;
- `tb_fibre_selector`: every pairing case, realignment after one and two late copies, a dead
  fibre costing a single timeout, one word per clock;
- `tb_sbus_master` and `tb_sbus_slave`: frame timing, absent slots, bus contention;
  `tb_sbus_master` runs a one-line and a three-line bus side by side;
- `tb_omb_lanes`: a 3-channel board whose serial bus uses all three data lines, driven over
  VME (register read-back, a checked packet, an injected event).

Parameters worth changing: `N_CH`, `FIFO_DEPTH`, `EVT_DEPTH` and `SB_LANES` on `omb_top`, and `TIMEOUT`
on `crc_fpga` and `fibre_selector`. The CRC is set by `POLY`/`INIT` on `crc_checker` together
with `CRC_POLY`/`CRC_INIT` in `omb_pkg`, which the injector uses for its built-in event.
