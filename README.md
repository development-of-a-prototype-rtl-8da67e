# ODIN: an optical S-LINK over HP G-Link chips

S-LINK is a one-way data link for detector read-out. On the front-end side, a
**Link Source Card (LSC)** accepts 33-bit words: 32 data bits plus a flag that
marks a *control word*, such as the begin or end of a data block. On the
read-out side, a **Link Destination Card (LDC)** hands out the same words in
the same order. The link also does these things:

- It tells the sender to stop (LFF#) when the receiver asserts XOFF (UXOFF#).
- It carries four return lines (URL -> LRL) back to the sender.
- It reports transmission errors together with the next control word.
- It resets itself from either end.
- It tells both users when it is down (LDOWN#).
- It has a built-in self-test.

ODIN builds this link from Hewlett-Packard G-Link serializers and optical
fibres. Each G-Link channel carries one 16-bit word per clock, so each S-LINK
word crosses the fibre as two G-Link frames. Two versions exist:

| | forward channels | G-Link clock | LCLK at LDC | max. data rate |
|---|---|---|---|---|
| double ODIN (`CHANNELS = 2`, default) | 2 | 40 MHz | 40 MHz | 160 Mbyte/s |
| single ODIN (`CHANNELS = 1`) | 1 | 64 MHz | 32 MHz | 128 Mbyte/s |

A separate G-Link channel runs from the LDC back to the LSC. It carries XOFF,
the return lines and the LDC's link state.

This repository holds the logic of the two protocol chips (one FPGA on each
card) as synthesizable SystemVerilog. The top, `odin_link`, places both chips
side by side. The G-Link chips, optical transceivers and fibres are not
logic, so they stay outside, and their parallel interfaces are ports of the
top:

```
           LSC (odin_lsc)                               LDC (odin_ldc)
 UD,UWEN#  +-----------+   +--------+  fwd_tx[c]  ~~fibre~~  fwd_rx[c]  +-------------+  +-------+  LD,LWEN#
 UCTRL# -->| async FIFO|-->| router |--> encoder c ==========> decoder c -->| merge/dbmux |->|sgmux* |--> LCTRL#,LDERR#
 LFF#   <--|  8 x 33   |   | parity,|     (CRC)                 (CRC,     | (rotation,  |  +-------+  LCLK
           +-----------+   | CRC,   |                           parity)   |  error rep.)|
                           | test   |                                     +-------------+
  LRL   <-- rc_decoder <===========================  return channel  <=== rc_encoder <-- URL, UXOFF#
  LDOWN#<-- lsc_fsm  <-- hp_up_filter                              ldc_fsm --> LDOWN#
                                                                    (* single ODIN only)
```

## How a word crosses a G-Link channel

A G-Link parallel word (`glink_word_t`) has four fields:

- `dav`: TX_DATA, a data frame;
- `cav`: TX_CNTL, a G-Link control frame;
- a flag bit;
- 16 data bits.

With both strobes low, the chip sends its own fill word.

| S-LINK content | frames on the channel |
|---|---|
| data word | 2 data frames, bits 31:16 first, flag = 1 |
| control word | 2 data frames, flag = 0; bits 3:0 are replaced by even parity (below) |
| checksum | control frame `CRCC`, then 1 data frame (flag = 1) holding the checksum |
| internal command | 1 control frame with the code in bits 9:0 |

The internal commands are written so that a single bit error cannot turn one
code into another:

| code (bits 9:0) | name | meaning |
|---|---|---|
| `0000000011` | CRCC | the next frame is a checksum |
| `0000001100` | TON | test mode on |
| `0000110000` | TOFF | test mode off |
| `0011000000` | RLDWN | the LSC is down |
| `1100000000` | RRES | remote reset |

The receiver acts on a command only when all ten bits match exactly.

**Control-word parity.** A control word's four low bits are not passed
through. They carry even parity over four groups: LD[3] covers bits 31:25,
LD[2] covers 24:18, LD[1] covers 17:11 and LD[0] covers 10:4. "Even" means an
all-zero control word has all-zero parity.

## Two channels, one stream

On the double ODIN, the router (`lsc_router`) hands whole S-LINK words to
channel A and channel B in strict rotation: A, B, A, B. The LDC's merge block
(`ldc_merge`, called dbmux on the cards) reads the channels in the same
rotation. This restores the original order even though the two fibres can
differ in length. Each channel has a 4-word queue at the merge, which absorbs
the skew between the fibres.

Some things are sent on **all** channels at once, waiting until every encoder
is free:

- checksums;
- internal commands.

The rotation pointer restarts on every RRES, at both ends. A checksum
therefore marks the same point in every channel's stream.

## Error detection

Each forward channel runs its own CRC-CCITT, polynomial x^16 + x^12 + x^5 + 1,
preset to all ones. The CRC covers every flagged frame.

- **Update form.** The register is updated one whole 16-bit frame per clock.
  It uses sixteen XOR equations, equivalent to a serial LFSR shifting the
  frame in bit 0 first. In that parallel form the register is bit-reversed
  with respect to the serial one.
- **Transmitter.** It appends `bitrev(R)` as the checksum.
- **Receiver.** It folds the checksum frame in like any other frame and
  expects a register of zero.
- **When a checksum is sent.** The router requests one in two cases:
  - before a control word that follows data, so each block boundary is
    covered;
  - after 1024 data words per channel (`CRC_WORDS`), so long blocks are
    checked on the way.
- **CRC restart.** Both ends restart the CRC after a checksum and on RRES.

At the LDC, errors are latched per channel until the next control word leaves
the card. That word goes out with LDERR# low and with its low bits used as a
report:

| bit | meaning |
|---|---|
| LD[3] | CRC error on channel A |
| LD[2] | CRC error on channel B |
| LD[1] | parity error in this control word |
| LD[0] | 0 |

Three kinds of error mark a channel's CRC latch:

- a G-Link receive error;
- a stray half word;
- a wrong checksum.

Data words never carry LDERR#. The corrupted data word itself is delivered,
and the error is reported at the end of its block.

## The return channel

The LDC sends one return word and then seven fill words, over and over. Every
field bit is sent twice:

| bits | field |
|---|---|
| [7:0] | URL[3:0], each bit doubled |
| [9:8] | XOFF |
| [11:10] | LDC down |
| [13:12] | remote reset request |
| [15:14] | reserved (00) |

The LSC discards a word in any of these cases:

- any pair differs;
- a reserved bit is set;
- the receiver flags an error;
- the word arrives as a control frame.

After a discarded word, LRL, XOFF and the link state simply keep their last
values. On the LSC, LRL is also a register in the XCLK domain that is loaded
only while the LSC state machine is UP. The return lines therefore stay
unaltered while the link is down. At one word in eight clocks, the return lines are sampled at 5 MHz
(double ODIN) or 8 MHz (single ODIN).

## Power-up, reset and the link-down protocol

This is the part that needs the most care. The two cards start independently,
can each be reset by their user, and must never lose a word written while the
link claimed to be up.

**The `hp_up` filter.** Each card first waits for its G-Link chips:

- the LSC for its transmitters' lock and its return receiver's ready;
- the LDC for its forward receivers' ready and its return transmitter's lock.

A 21-bit counter (`hp_up_filter`) must then run all the way up with those
signals high before `hp_up` is asserted. The counter restarts whenever one of
the signals drops. At 40 MHz this takes 52 ms.

**`rlup`.** Each card also tracks whether the other end looks alive:

- The LSC drops `rlup` when the return channel reports "LDC down".
- The LDC drops `rlup` when an RLDWN command arrives, and raises it on any
  other command.

**LSC state machine (`lsc_fsm`).**

| state | sends on the forward channel | LDOWN# | leaves to |
|---|---|---|---|
| POWER | RRES, 1 frame in 8 | low | RESET when `hp_up & rlup` |
| RESET | RRES once on entry | low (high if answering an LDC reset) | UP after 4 clocks |
| UP | data | high | RESET on an LDC reset request; POWER on URESET#; DOWN when `hp_up` or `rlup` is lost |
| DOWN | RLDWN, 1 frame in 8 | low | POWER on a reset from either end |

**LDC state machine (`ldc_fsm`).**

| state | return channel says | leaves to |
|---|---|---|
| POWER/DOWN | LDC down | UP when `hp_up & rlup`; RES1 on URESET# |
| RES1 | LDC down | RES2-4 when `hp_up` |
| RES2-4 | remote reset | UP on RRES from the LSC; RES1 if `hp_up` is lost |
| UP | normal | RES2-4 on URESET#; POWER/DOWN when `hp_up` or `rlup` is lost |

An RRES received while the LDC is in UP leaves it in UP. It only clears the
error latches and test mode.

What these tables produce:

- **Power-up.** The LDC sits in POWER/DOWN and reports "down", so the LSC
  stays in POWER and keeps sending RRES. The RRES raises the LDC's `rlup`, so
  the LDC goes UP first and stops reporting down. The LSC then passes through
  RESET to UP. The destination is always up before the source accepts data.
- **LDC reset (URESET# at the LDC).** The LDC goes to RES2-4 and asks for a reset.
  The LSC answers from UP through RESET, sending RRES, and keeps LDOWN# high.
  The RRES brings the LDC back to UP. Only the card that was reset shows link
  down.
- **LSC reset.** The LSC drops to POWER, LDOWN# goes low, and it sends RRES.
  The LDC stays UP, clearing its latches. The LSC comes back through RESET.
- **Broken fibre or a lost card.** The LDC loses `hp_up` and reports down, so
  the LSC goes DOWN and starts sending RLDWN. When the fibre comes back, the
  RLDWN holds the LDC's `rlup` low. Both ends therefore **stay down until a
  user resets either card**. A fatal condition is latched, not silently
  recovered.

Do not reset either card while the user is writing to the LSC. Words in the
input FIFO are lost on an LSC reset.

## Self-test

The LSC user holds UTDO# low. While the link is up, the router:

1. sends TON on all channels;
2. sends the walking-one pattern 1, 2, 4 ... 2^31, 1 ... as data words, in the
   same rotation as user data;
3. on UTDO# high, sends the closing checksum and TOFF.

Both cards assert LDOWN# during the test. The LDC checks every test word and
lights its error LED on a mismatch. It also passes the pattern to its user.
Flow control keeps working during the test.

## Flow control

UXOFF# low at the LDC is sent back on the return channel. On receiving it:

- the LSC router stops starting new words;
- the 8-word input FIFO fills;
- LFF# goes low while there is still room for two more words.

The words already in flight still arrive. That number sets the buffer the
read-out side must keep behind XOFF. Published figures for ODIN are
**40 + L/2 words** (double) and **20 + 5L/13 words** (single), with L the
fibre length in metres. In simulation with no fibre delay, this RTL delivers
21 and 12 words after UXOFF# falls.

The single ODIN's LSC can send only 32 Mwords/s. A faster user clock makes
LFF# toggle even without XOFF.

## Clock domains

| card | domain | clock | logic |
|---|---|---|---|
| LSC | user | UCLK | FIFO write side, URESET# and UTDO# inputs |
| LSC | transmit | XCLK, the card oscillator | router, encoders, state machine, FIFO read side |
| LSC | return receive | recovered clock of the return receiver | `rc_decoder` |
| LDC | forward receive | RX_CLK, recovered by the forward receivers | decoders, merge, LCLK stage |
| LDC | oscillator | XCLK | state machine, `rc_encoder` |

Both channels of the double ODIN are received on one recovered clock; the
chips' receivers run from a common reference.

Crossings between domains:

- Levels use two flip-flops (`sync_2ff`).
- The RRES event on the LDC uses a toggle synchroniser (`sync_pulse`).
- The FIFO uses Gray-coded pointers.

**Output clock.**

- Double ODIN: LCLK is RX_CLK itself.
- Single ODIN: `ldc_sgmux` makes LCLK = RX_CLK/2. LD changes only on RX_CLK
  edges where LCLK is high, so LD is stable around every rising LCLK edge.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CHANNELS` | 2 | `odin_link`, `odin_lsc`, `odin_ldc`, `lsc_router`, `ldc_merge` | forward channels: 2 = double, 1 = single ODIN |
| `HP_CNT_BITS` | 21 | `odin_link`, cards, `hp_up_filter` | width of the G-Link stability counter |
| `CRC_WORDS` | 1024 | `odin_link`, `odin_lsc`, `lsc_router` | data words per channel between periodic checksums |
| `FIFO_DEPTH` | 8 | `odin_lsc` | LSC input FIFO, 33 bits wide |
| `RESET_CYCLES` | 4 | `odin_lsc`, `lsc_fsm` | minimum link-down time on an LSC reset |
| `QDEPTH` | 4 | `ldc_merge` | per-channel queue at the merge (this design's choice) |

Both cards must be built with the same `CHANNELS`.

## Where this RTL departs from or goes beyond the specification

- **UTDO# sampling.** The cards' specification samples UTDO# at link reset.
  Here UTDO# is a level watched while the link is up: pulling it low starts
  the test, releasing it ends the test.
- **LSC reset counter clock.** The LSC's reset counter runs on XCLK, not UCLK.
  Four XCLK cycles are at least four UCLK cycles whenever UCLK <= XCLK.
- **Choices of this design's own:**
  - the merge queue depth;
  - the single-ODIN output queue (2 words);
  - the use of LD[1] for the control-word parity error;
  - how idle frames are timed.
- **Not modelled:**
  - the G-Link chips' own serial coding and lock behaviour (there is only a
    behavioural model in `tb/glink_model.sv`);
  - the optical parts;
  - the LED drivers beyond one signal per LED;
  - the board's power LED.
- **Not run:** the average rate against block size was not measured. Nor was
  the link run with user clocks below 40 MHz.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

| testbench | what it covers |
|---|---|
| `tb_crc_ccitt16` | the parallel CRC against a bit-serial LFSR, and the zero residue |
| `tb_async_fifo` | ordering, full/almost-full and empty under two unrelated clocks |
| `tb_glink_tx_encoder`, `tb_glink_rx_decoder` | framing, parity, checksums and commands against reference models |
| `tb_lsc_router`, `tb_ldc_merge` | rotation, checksum placement, test pattern, skew between channels, error reports |
| `tb_lsc_fsm`, `tb_ldc_fsm` | the transitions of the two state machines |
| `tb_rc_encoder`, `tb_rc_decoder` | the doubled return word and discarding corrupt words |
| `tb_hp_up_filter`, `tb_ldc_sgmux` | filter timing; LCLK phase and LD stability |

**End-to-end.** `tb_odin_link` runs both configurations through one scenario,
with a 6-bit filter and a checksum every 16 words. `tb_odin_lsc` and
`tb_odin_ldc` run the same scenario on the two card modules wired directly.
The scenario is driven by `tb/odin_env.sv` and covers:

- power-up (the LDC up first);
- random blocks;
- a long block with periodic checksums and a throughput measurement;
- XOFF;
- the return lines, including LRL holding while the link is down;
- a bit flipped on the fibre, which must come back as LDERR# on the next
  control word;
- self-test;
- a reset from each end;
- a broken fibre, after which the link must stay down until a reset.

Every word delivered is compared with what was written. The scenario counts
how often each of these mechanisms happened and fails if any count is zero.

**Full size.** `tb_odin_link_full` runs the same scenario on `odin_link` at
its defaults: double ODIN, 21-bit filter, 1024-word checksum interval. It
takes about 15 s of CPU time and measures 159.8 Mbyte/s inside a block.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/odin_pkg.sv tb/tb_odin_link.sv \
    --top-module tb_odin_link -o sim
./obj_dir/sim +verilator+rand+reset+2
```

To run another test, replace `tb_odin_link` with its name. Tests are written
for two-state simulation with random initial values, so every register that
is read has a reset.

## Files

| file | contents |
|---|---|
| `rtl/odin_pkg.sv` | word types, command codes, parity and CRC functions |
| `rtl/odin_link.sv` | top: LSC and LDC chips |
| `rtl/odin_lsc.sv` | LSC card |
| `rtl/async_fifo.sv`, `rtl/lsc_router.sv`, `rtl/glink_tx_encoder.sv`, `rtl/rc_decoder.sv`, `rtl/lsc_fsm.sv` | LSC parts |
| `rtl/odin_ldc.sv` | LDC card |
| `rtl/glink_rx_decoder.sv`, `rtl/ldc_merge.sv`, `rtl/ldc_sgmux.sv`, `rtl/rc_encoder.sv`, `rtl/ldc_fsm.sv` | LDC parts |
| `rtl/crc_ccitt16.sv`, `rtl/hp_up_filter.sv`, `rtl/sync_2ff.sv`, `rtl/sync_pulse.sv` | shared parts |
| `tb/glink_model.sv` | behavioural G-Link chip pair and fibre |
| `tb/odin_env.sv` | end-to-end scenario and scoreboard |
