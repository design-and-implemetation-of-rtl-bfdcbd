# IFF reply decoder-degarbler

An IFF / secondary-radar interrogator receives transponder replies. Each reply
is a short pulse train: two framing pulses, F1 and F2, 20.3 us apart. Up to 13
information pulses sit between them on a 1.45 us grid. When two aircraft answer
at nearly the same time, their pulse trains overlap. This is called *garble*.
Pulses of the second reply then land in or near the information slots of the
first, and a plain decoder reads a code that neither aircraft sent.

This design decodes replies and recognises garble. The whole pulse train passes
through tapped shift-register delay lines at 50 MHz. A reply is decoded when
its two framing pulses sit at the two ends of the middle line. At that moment
the design also looks for a second pair of framing pulses anywhere within one
frame before or after. The decode is accepted only if it has a short stretch
that is clear of garble. So overlapping replies are suppressed. Replies that
only come close in time, with their pulses interleaved, are still decoded.

## Reply format and timing

| quantity | value | in clocks at 50 MHz |
|---|---|---|
| slot (information-pulse spacing) | 1.45 us | 72 stages (1.44 us) |
| frame (F1 to F2) | 20.3 us = 14 slots | 1008 stages |
| pulse width | 0.45 us nominal | ~22 |
| decode sub-zone, garble-clear sub-zone | 40 ns each | 2 clocks each |

The 13 information positions, in the order they arrive after F1, are
C1 A1 C2 A2 C4 A4 X B1 D1 B2 D2 B4 D4. The decoded code has C1 in bit 12 and
D4 in bit 0. `iff_pkg::iff_code_t` is a packed struct with these field names.

72 stages give 1.44 us, not 1.45 us. A 20.3 us frame therefore sits 7 clocks
off the tap grid. The ~22-clock pulse width absorbs this. At the decode instant
both framing pulses still overlap their taps for about 15 clocks.

## Data path

```
video_in -> pulse_validator -> [after line] -> [decode line] -> [before line]
                                    \______________|_______________/
                                             43 taps
                                                |
                                    bracket_garble_detector
                                     bracket | garble | info[12:0]
                                                |
                                       degarble_criteria  <- degarble_en
                                        decode | bracket_zone
                                                |
                                         reply_decoder -> code, code_valid
                                                |
                                          code_filter  <- filter_en, sel_code, sel_mask
                                                |
                                          code_buffer  -> rd_code (FIFO, rd_en)
```

| module | role |
|---|---|
| `iff_pkg` | constants (72, 14, 13, 2, 2) and the code struct |
| `pulse_validator` | 2-flop synchroniser. Passes only pulses at least `MIN_WIDTH` clocks wide, keeping their width. Fixed delay of `MIN_WIDTH+2` clocks. |
| `delay_line` | one 1008-stage shift register with a tap every 72 stages (15 taps) |
| `bracket_garble_detector` | the AND/OR network on the chained taps (combinational) |
| `degarble_criteria` | shift registers for bracket and garble, and the sub-zone test |
| `reply_decoder` | latches the 13 information bits once per accepted bracket |
| `code_filter` | optionally passes only a selected code |
| `code_buffer` | 16-word first-word-fall-through FIFO with a sticky overflow flag |
| `degarbler_top` | wires the above together |

## How bracket and garble are found

The three lines are chained. Number the taps by their delay in slots, m = 0
(the validated input) up to m = 42. Taps 0..14 belong to the *after* line,
14..28 to the *decode* line and 28..42 to the *before* line.

* **Bracket decode** = tap 14 AND tap 28. F2 is at the input end of the decode
  line and F1 is at its output end.
* **Information bits**: slot i (1..13) of that reply is at tap 28-i.
* **Garble** = OR over k = 1..13 of (tap 14-k AND tap 28-k) and
  (tap 14+k AND tap 28+k). Each term is a second reply displaced by k slots.
  With -k the reply arrived later and sits in the after line. With +k it
  arrived earlier and sits in the before line.

The garble signal also fires whenever a single reply passes through a displaced
position. So garble on its own means nothing. What matters is garble close in
time to a bracket decode. A displacement of exactly 14 slots, where F2 of one
reply falls on F1 of the other, is not counted. It does not disturb any
information slot. The last 72 stages of the before line are therefore never
read. They are kept so that all three lines are the same 20.3 us length, and
synthesis removes them.

## The degarbling criteria (the key part)

Two overlapping replies produce a bracket decode and a garble pulse that are
both about a pulse-width long. How far apart in time they fall depends on how
exactly the second reply lines up with the slot grid of the first. The
criteria block shifts both signals through a 6-clock window:

```
clock (newest -> oldest):  1   2   3   4   5   6
garble must be low:        x   x   x   x   x   x
bracket must be high:              x   x
```

`decode` is high on every clock where the bracket decode covers the 2-clock
decode sub-zone and garble is absent from the whole window: the sub-zone plus
2 clocks on each side. The test slides along the whole bracket decode, from its
leading edge to its trailing edge. So the result adapts to the timing:

* Second reply exactly on the grid: the garble pulse covers the bracket decode.
  No decode is given for either reply.
* Second reply interleaved, e.g. half a slot off: the garble appears away from
  the bracket decode. Both replies decode correctly.
* Partial overlap: a decode is given if some part of the bracket decode is
  clear by at least 2 clocks on each side.

Garble is also required to be clear *inside* the decode sub-zone, not only at
its sides. This is a reading of "a minimum garble clear sub-zone on each side"
of the decode, chosen so that a fully covered decode can never pass.

With `degarble_en = 0` the garble test is dropped. The bracket decoder then
works alone. It decodes every non-overlapping reply. Overlapping replies come
out merged: each code is ORed with the other reply's pulses.

`reply_decoder` delays the information taps by `ALIGN = CLEAR_ZONE+1` clocks.
The bits it latches are therefore the ones present with the newest bracket
sample of the sub-zone that passed. It emits one code per bracket decode, on
the first `decode` clock, and re-arms when the aligned bracket decode ends.

## Timing at the top

* A reply's code strobes on `code_valid` **2041 clocks (40.8 us)** after its F1
  enters `video_in`, for pulses on the 1.45 us grid. For pulses exactly on the
  72-clock grid it is 2034 clocks. This is one frame in the after line, one
  frame in the decode line, 12 validator clocks and 4 criteria/decoder clocks.
  The code is written to the buffer one clock later.
* `rd_code` shows the oldest buffered code while `buf_empty` is low. `rd_en`
  pops it.
* `bracket`, `garble`, `decode` and `garbled` are brought out for observation.
  `garbled` means garble in the window while a bracket decode is present.

## Parameters

| parameter | default | where |
|---|---|---|
| `STAGES_PER_SLOT` | 72 | `degarbler_top`, `delay_line` |
| `SLOTS_PER_FRAME` | 14 | `iff_pkg` |
| `DECODE_ZONE`, `CLEAR_ZONE` | 2, 2 | `iff_pkg` |
| `MIN_WIDTH` | 10 clocks (0.2 us) | `degarbler_top`, `pulse_validator` |
| `BUF_DEPTH` | 16 | `degarbler_top` |

The 72-stage slot, 14-slot frame, three 20.3 us lines, 2-clock sub-zones, the
bracket-only mode and the bit order all come from the design being
implemented. These are this implementation's own choices:

* the pulse-validation rule and its 10-clock minimum;
* the 2-flop synchroniser;
* asynchronous active-low reset, which clears every line;
* one code per bracket decode;
* the code filter's select/mask interface;
* the FIFO depth and its drop-when-full policy.

## Departures and limits

* The slot is 1.44 us (72 x 20 ns) rather than 1.45 us, and the lines are
  20.16 us rather than 20.3 us. See above.
* Only the pulse-position decode is implemented. Mode A/C interpretation of the
  code (octal identity, altitude Gray code) and the special position
  identification pulse are not part of this design.
* The decoded-pulse output used for oscilloscope viewing is not reproduced. The
  decoded code, strobe, buffer and the internal bracket, garble and decode
  signals are given instead.
* Garble resolution is limited by the 2-clock sub-zones and by the real pulse
  width. `tb_garble_sweep` places a second reply k x 72 + d clocks after the
  first, for k = 1..13, and reports what happens to the 26 replies at each
  offset d. One typical run gave the table below.

  | d (clocks) | correct | wrong | suppressed |
  |---|---|---|---|
  | 0 (pulse on pulse) | 0 | 0 | 26 |
  | 4 | 0 | 10 | 16 |
  | 8 | 11 | 15 | 0 |
  | 12-20 | 18-20 | 6-8 | 0 |
  | 28, 36 | 26 | 0 | 0 |

  Exact overlaps are always suppressed, and pulses more than a pulse width
  apart always decode correctly. In between, the garble pulse and the bracket
  decode separate in time before the information pulses stop touching each
  other. So some replies pass the criteria with a bit of the other reply in
  their code. The 2-clock sub-zones are the design's defaults. Setting
  `CLEAR_ZONE` in `iff_pkg` to 6 removed nearly all wrong decodes in the same
  sweep: d = 4 gave 26 suppressed, d = 8 gave 9 correct, 3 wrong and 14
  suppressed, d = 12 gave 22 correct and 4 suppressed, and d >= 16 gave all 26
  correct. The cost is that a decode then needs a longer garble-free
  stretch, so more closely overlapped replies are suppressed.

## Simulation

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/iff_pkg.sv \
          tb/tb_degarbler_top.sv --top tb_degarbler_top -Mdir obj -o sim
./obj/sim
```

`tb_degarbler_top` runs the top at its default sizes for about 100k clocks
(under a second). It builds reply video from random codes and exercises the
following, all checked against expected codes worked out from the reply
timing:

* single replies;
* separated pairs;
* exact overlaps, which must be suppressed;
* half-slot interleaves, which must both decode;
* bracket-only mode, where the codes come out merged;
* noise pulses, which the validator must reject;
* a burst of 18 replies into the 16-word buffer, which overflows;
* the code filter.

It also checks the decode latency, and it counts each mechanism and fails if
one never happens. The unit testbenches `tb_pulse_validator`, `tb_delay_line`,
`tb_bracket_garble_detector`, `tb_degarble_criteria`, `tb_reply_decoder`,
`tb_code_buffer` and `tb_code_filter` compare each block with its own
reference model on random stimulus. `tb_garble_sweep` runs the overlap sweep
described above. It checks the exact-overlap and interleaved cases and prints
the rest.
