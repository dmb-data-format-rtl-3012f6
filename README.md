# DMB readout: one event per Level-1 Accept

In the CMS cathode strip chamber readout, the DAQ motherboard (DMB) sits between
the on-chamber boards and the downstream DDU. Seven boards feed one DMB: five
cathode front-end boards (CFEB1..CFEB5), the anode board (ALCT) and the trigger
motherboard (TMB). When a board sees a Level-1 Accept (L1A) that matches its own
trigger, it raises a one-BX *DAV* ("data available") line and starts pushing its
data into its own input FIFO on the DMB, ending with an end-of-event marker.

The DMB's job is to turn this into one clean record per L1A. For every L1A it
decides which boards answered, then either sends four *lone words* (nobody had
data) or a full event: two headers, the data of every board that answered, and two
trailers carrying FIFO health, time-out flags, backlog and a CRC. This RTL builds
that readout path in the 2005 production data format. One clock cycle is one
bunch crossing (BX).

```
 FEB DAV lines ──► dmb_dav_window ──► DAV-result FIFO ─┐
 L1A ──┬──────────► (delay + 3-BX window)              │
       └─► dmb_l1a_fifo (L1A no., BXN, sync count) ────┤
 CFEB1..5, ALCT, TMB words ─► 7 × dmb_input_fifo ──────┼─► dmb_event_builder ─► ddu_data
                      dmb_overlap_fifo (CFEB samples) ◄┘        (+ dmb_crc22)
```

## The word stream

Every word is 16 bits; bits 15:12 are a signature so the DDU can parse the
stream without lengths. Board data always has bit 15 = 0, so it can never look
like a header or trailer (CFEB data may contain its own error words with
signature `B`; the DMB passes them through untouched).

**Lone event** (no board had DAV), four words:

| word | 15:12 | 11:0 |
|---|---|---|
| 1 | 8 | 000 |
| 2 | 8 | L1A number [11:0] |
| 3 | 8 | L1A number [23:12] |
| 4 | 8 | BXN [11:0] |

**Full event**: Header 1 (signature 9; also serves as the "DMB has data" signal
to the DDU), Header 2 (A), the ALCT, TMB and CFEB1..5 data in that order (boards
without DAV send nothing), Trailer 1 (F) and Trailer 2 (E).

| word | sig | bits 11:0 |
|---|---|---|
| H1.1 | 9 | L1A [11:0] |
| H1.2 | 9 | L1A [23:12] |
| H1.3 | 9 | 11 TMB_DAV, 10 ALCT_DAV, 9:5 CFEB_ACTIVE, 4:0 CFEB_DAV |
| H1.4 | 9 | BXN [11:0] |
| H2.1 | A | 11 TMB_DAV, 10 MM, 9 ALCT_DAV, 8 MM, 7 TMB_DAV, 6 MM, 5 ALCT_DAV, 4:0 CFEB_DAV |
| H2.2 | A | 11:4 crate ID, 3:0 DMB ID |
| H2.3 | A | 11:7 CFEB_MOVLP, 6:0 BXN [6:0] |
| H2.4 | A | 11:8 sync count, 7:0 L1A [7:0] |
| data | 0 | ALCT, TMB, CFEB1..CFEB5 words |
| T1.1 | F | 11:8 BXN [3:0], 7:0 L1A [7:0] |
| T1.2 | F | 11:7 CFEB_MOVLP, 6 ALCT half-OK, 5 TMB half-OK, 4:0 CFEB half-OK |
| T1.3 | F | 11:4 L1_PIPE, 3 ALCT empty, 2 TMB empty, 1 ALCT start time-out, 0 TMB start time-out |
| T1.4 | F | 11:7 CFEB end time-out, 6 ALCT end t/o, 5 TMB end t/o, 4:0 CFEB start time-out |
| T2.1 | E | 11 ALCT full, 10 TMB full, 9:5 CFEB full, 4:0 CFEB empty |
| T2.2 | E | 11:4 crate ID, 3:0 DMB ID |
| T2.3 | E | 11 odd parity of CRC[10:0], 10:0 CRC[10:0] |
| T2.4 | E | 11 odd parity of CRC[21:11], 10:0 CRC[21:11] |

`MM` is 1 when CFEB_ACTIVE (the CFEBs the TMB expected to answer) differs from
CFEB_DAV (the CFEBs that did). Bit 0 of each 5-bit CFEB field is CFEB1.

Field meanings worth knowing:

* **half-OK** is 1 while that input FIFO is at most half full, 0 above (a warning).
* **empty** is 1 when the FIFO holds nothing beyond the event being sent; at low
  rates all are 1. Empty, half and full are sampled live, when that trailer word
  leaves.
* **full** is *sticky*: once a FIFO has been full, data were lost and event
  boundaries can no longer be trusted, so the bit stays set until a reset or
  SyncReset.
* **L1_PIPE** is the number of L1As still waiting behind the one being sent.
  Bit 7 is a scale flag: values up to 127 are sent as is, larger ones divided by
  8 (`N = bits[6:0] × 8^bit7`); the 9-bit backlog counter therefore tops out at
  63 × 8 = 504.
* **sync count** is a 4-bit count of BXs since the last SyncReset, sampled at the
  L1A; the CFEBs keep a similar counter, so comparing them checks alignment.
* **CRC** covers every word from H1.1 through T2.2, MSB first, polynomial
  x²² + x + 1, starting from zero.

## From L1A to event

`dmb_l1a_fifo` keeps three counters: the 24-bit L1A number (the first L1A after a
reset is 1), the 12-bit BXN (0..3563, cleared by `bc0`) and the 4-bit sync count.
At each L1A it stores {L1A, BXN, sync} in a 512-entry FIFO.

DAV lines come back later than the L1A, by cable delay and muon flight time.
`dmb_dav_window` delays every L1A by `l1a_delay` BXs and accepts a DAV that
arrives within a window of `WIN` = 3 BXs centred on the delayed L1A (from
delay−1 to delay+1 BXs after the L1A). The CFEB multiple-overlap lines
(`cfeb_movlp`) and the TMB's CFEB_ACTIVE pattern (`tmb_cfeb_active`) are ORed
over the same window. When the window closes, the result goes into a second FIFO.

`dmb_event_builder` waits until both FIFOs hold an entry, pops one of each and
builds that L1A's event. Because both FIFOs are written once per L1A and in
order, their entries always pair up. The DMB does not compare L1A or BXN numbers
inside the board data. If an input FIFO overflows and an end-of-event marker is
lost, data from different L1As will be merged. The sticky full bit is what tells
the receiver this has happened.

If `l1a_delay` is set wrong, boards still send DAV and push data, but the DMB never
matches them. It sends lone events, and the unread data piles up in the input
FIFOs until they fill. The end-to-end testbench reproduces this.

## Reading the boards

The builder visits the boards in a fixed order: ALCT, TMB, CFEB1..CFEB5. For each
board with DAV it pops words from its input FIFO, first-word-fall-through, one per
clock, and forwards them. It stops after the word carrying the end-of-event tag.
If the FIFO is empty it waits. Two timers guard the wait. Both start when the
board's turn begins:

* **start time-out**: the FIFO stayed empty for `START_TIMEOUT` (1024) cycles.
  The board's block is empty and its start-time-out bit is set.
* **end time-out**: the end-of-event word had not arrived after `END_TIMEOUT`
  (4096) cycles. The words read so far are sent and the end-time-out bit is set.
  Whatever the board sends later stays in its FIFO and will be read as part of the
  next event, so an end time-out calls for a SyncReset.

Time-out bits describe the current event only.

Timing: the output is registered and carries one word per clock while `ddu_valid`
is high. There is no back-pressure. A lone event takes 4 consecutive words plus
one cycle to start. A full event takes 8 header cycles, plus one cycle per board
position (7), plus one cycle per CFEB overlap check (5), plus one cycle per data
word, plus 8 trailer cycles, plus one cycle to start.

## Shared CFEB samples: the overlap FIFO

A CFEB reads out a train of time samples per L1A. Two L1As close together can
share samples. The CFEB then sends each shared sample only once, with the earlier
event, tagged as overlapping (`feb_word_t.ovl`). The DMB:

1. sends the tagged sample with the earlier event and also stores it, with its
   CFEB number, in the single `dmb_overlap_fifo` shared by all five CFEBs;
2. at the next full event, before reading CFEBk's input FIFO, pops CFEBk's stored
   samples and sends them first, followed by CFEBk's new samples.

Stored samples are written in CFEB order, so each CFEB's samples from the previous
event form a run at the head of the FIFO. At the start of each event the FIFO
latches its count (`mark` → `prev_left`). In this way samples stored during the
current event, which sit behind that run, are never taken by mistake. If CFEBk has
no DAV in the next event, its stored samples are dropped. A sample that would be
shared by more than two events cannot be handled: the CFEB signals this on its
MOVLP line, sends no data, and the DMB reports it in CFEB_MOVLP. The FIFO holds
8192 entries, one full 16-sample event from all five CFEBs (5 × 16 × 100 words),
so in normal operation it never fills. An assertion in `dmb_top` checks this.

## Interface of `dmb_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | BX clock |
| `rst` | in | 1 | hard reset (synchronous) |
| `sync_rst` | in | 1 | SyncReset: clears L1A and sync counters, flushes all FIFOs, clears sticky full flags, aborts the event being sent |
| `bc0` | in | 1 | bunch crossing zero, clears BXN |
| `l1a` | in | 1 | Level-1 Accept, one cycle |
| `l1a_delay` | in | 8 | DAV window position, BX after the L1A |
| `crate_id`, `dmb_id` | in | 8, 4 | copied into headers and trailers |
| `feb_dav` | in | 7 | DAV of CFEB1..5 (bits 0..4), ALCT (5), TMB (6) |
| `feb_wr`, `feb_wdata` | in | 7, 7×18 | per-board FIFO write: `{ovl, eoe, data[15:0]}` |
| `cfeb_movlp` | in | 5 | CFEB multiple-overlap lines, sampled in the window |
| `tmb_cfeb_active` | in | 5 | TMB's CFEB_ACTIVE pattern, sampled in the window |
| `ddu_data`, `ddu_valid` | out | 16, 1 | word stream to the DDU |
| `busy` | out | 1 | an event is being sent |
| `feb_full_stk`, `l1a_fifo_full` | out | 7, 1 | sticky input-FIFO full flags; L1A FIFO full |

## Parameters and sizes

| parameter | default | why |
|---|---|---|
| `FEB_FIFO_DEPTH` | 16384 | about twenty 8-sample CFEB events (≈ 800 words each) |
| `OVL_DEPTH` | 8192 | one 16-sample event from five CFEBs (8000 words) |
| `L1A_DEPTH` | 512 | ≥ the 504 pending L1As that L1_PIPE can report |
| `WIN` | 3 | DAV window width in BX; the spec allows tuning it |
| `START_TIMEOUT`, `END_TIMEOUT` | 1024, 4096 | same for all boards; the end time-out exceeds a 1600-word 16-sample CFEB event |

At the defaults, synthesis gives about 2.25 Mbit of FIFO memory and about 840
flip-flops outside it.

## What follows the specification and what is this design's choice

The following come from the 2005 DMB data format: the word layouts, the order of
blocks, the DAV window and its 3-BX width, which FIFOs exist, the overlap
mechanism, the sticky full bits, the meaning of L1_PIPE, and the field widths.
Where the format is silent or inconsistent, this RTL decides:

* **CRC code.** The format reserves 22 CRC bits but does not define the code. The
  polynomial x²² + x + 1, the zero start value and the covered words are choices.
  The parity bits cover the 11 CRC bits that share their word; the format's
  comment and its table disagree on this, and the table was followed.
* **H2.1 layout.** It is copied as the 2005 table prints it (`a c b c a c b`, with
  `c` = ACTIVE/DAV mismatch). Older firmware repeated TMB_DAV there.
* **Full polarity.** 1 = full, as in the 2005 comments. An older firmware note
  says 0.
* **L1_PIPE encoding.** The printed formula and its stated maximum do not agree;
  the encoding above reproduces the stated maximum of 504.
* **Board interface.** The end-of-event marker and the overlap mark travel as two
  tag bits beside each 16-bit word. MOVLP and CFEB_ACTIVE arrive on dedicated
  lines sampled in the DAV window.
* **Choices where the format gives nothing.** The FIFO depths (they follow from
  the event sizes above), the time-out lengths and where the timers start, what
  SyncReset clears, the absence of DDU back-pressure, the BXN orbit length, and
  starting the L1A numbers at 1.
* **Not built.** The DDU's suppression of lone words is outside the DMB. The
  older 2003/2004 formats are not built. The front-end boards themselves are not
  built either; the testbench models them.

## Files

| file | contents |
|---|---|
| `rtl/dmb_pkg.sv` | constants, record and FIFO-entry types, L1_PIPE encoder |
| `rtl/dmb_fifo.sv` | generic first-word-fall-through FIFO |
| `rtl/dmb_input_fifo.sv` | board input FIFO with half/empty/sticky-full status |
| `rtl/dmb_l1a_fifo.sv` | L1A, BXN and sync counters with the L1A/BXN FIFO |
| `rtl/dmb_dav_window.sv` | L1A delay, DAV window, DAV-result FIFO |
| `rtl/dmb_overlap_fifo.sv` | shared CFEB overlap store |
| `rtl/dmb_crc22.sv` | CRC-22 accumulator |
| `rtl/dmb_event_builder.sv` | event assembly state machine |
| `rtl/dmb_top.sv` | the readout path |
| `tb/tb_dmb_ref_pkg.sv` | reference model of lone and full events, CRC by long division |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own, or
after a watchdog expires. To run the end-to-end test, at the default sizes:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/dmb_pkg.sv tb/tb_dmb_ref_pkg.sv tb/tb_dmb_top.sv --top-module tb_dmb_top
./obj_dir/Vtb_dmb_top
```

Replace `tb_dmb_top` with any other testbench name to run it. The unit
testbenches shrink FIFO depths and time-outs with parameter overrides. The
testbenches change inputs 1 ns after the rising edge with blocking assignments,
which keeps them free of races in Verilator's scheduler.

`tb_dmb_top` models the seven boards. Each board raises DAV at a set offset
from the delayed L1A and queues its words into its FIFO. The test covers:

* a lone event
* a full event with DAVs at both window edges, an ACTIVE/DAV mismatch and a MOVLP bit
* two L1As 3 BX apart sharing CFEB samples
* a burst that backs up L1_PIPE
* TMB and CFEB start time-outs and an ALCT end time-out
* a DAV outside the window
* an overfilled FIFO (half warning, sticky full)
* SyncReset

It checks every word of every event against the reference model. It also counts
each of these mechanisms and fails if one never happened. `tb_dmb_capacity` fills
the buffers to their design sizes.
