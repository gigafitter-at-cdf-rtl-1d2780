# GigaFitter: full-precision track fitting for the CDF silicon vertex trigger

The Silicon Vertex Trigger (SVT) of the CDF experiment reconstructs charged-particle
tracks fast enough to use them in the level-2 trigger decision. Pattern recognition
happens upstream. Associative memories compare coarse hits against a bank of precomputed
track patterns. For each match they output a *road*: the full-resolution hits on the
five silicon (SVX) layers that fell inside the pattern, plus the tracks the drift-chamber
trigger (XFT) found in it.

Any combination of one hit per layer in a road may be a real track. The GigaFitter's job
is to take every road of every event, try all of these combinations, and fit each one.
For the 18-bit track fit it uses a linearised fit, a set of six scalar products with
constants stored on the board. It then keeps the combinations whose chi-square is good
and sends them on as tracks. The board does this for all twelve azimuthal wedges of the
detector at once, at one fit per clock per wedge.

This repository is a synthesizable SystemVerilog model of that board. It comes with a
self-checking testbench for every block and an end-to-end test of the full twelve-wedge
board.

```
 12 SVT cables (one per wedge, from the HitBuffers)
   |  |  |  |      |  |  |  |      |  |  |  |
 +-v--v--v--v-+  +-v--v--v--v-+  +-v--v--v--v-+
 | mezzanine 0|  | mezzanine 1|  | mezzanine 2|   4 track processors + merger each
 +-----+------+  +-----+------+  +-----+------+
       +-------+-------+               |
          Data1 merger           Data2 merger      (Pulsar motherboard FPGAs)
               +---------------+-------+
                        Control merger
                               |
                  one SVT cable to the GhostBuster
```

## One wedge: the track processor

`gf_track_processor` does all the work for one wedge. It is a single pipeline that runs
at one fit per clock once a road is loaded:

```
SVT cable -> Input FIFO --HOLD-->
   -> Combiner A / Combiner B (alternating)      all hit combinations, 7 coordinates
   -> Combination FIFO 1 -> format converter      7 -> 6 coordinates, 5/5 split
   -> Combination FIFO 2 -> Fit Organizer         constant-set lookup
   -> 6 x (Serializer -> DSP Fitter)              six scalar products, 6 clocks each
   -> Comparator (3 chi2 units)                   chi2 cut, best fit of a sequence
   -> Track FIFO -> Formatter -> output FIFO      7-word track packets, End Event
```

### Combiners (`gf_combiner`, `gf_combiner_pair`)

A Combiner works in two phases:

1. **Load.** It pops one road packet from the input FIFO. Each SVX hit is written into a
   32-entry RAM for its layer, and a counter per layer counts the hits. XFT tracks go
   into a sixth RAM.
2. **Combine.** The six counters drive an odometer of RAM addresses. Layer 0 changes
   fastest and the XFT track slowest. Every clock the six RAMs are read together, giving
   one 7-coordinate combination: five SVX coordinates plus XFT curvature and phi.

A layer with no hits contributes a zero and a cleared bit in the *hitmap*. Such a road is
"4/5"; a road with hits on all five layers is "5/5".

Two Combiners alternate: one loads the next road while the other streams out the current
one. Packets are handed out in strict turn and outputs are taken in the same turn, so
combinations leave in road order. A 2×2×2×2×2 road (32 combinations) followed by seven
more like it streams out at about one combination per clock; the pair testbench measures
257 outputs in 270 clocks.

### The 5/5 split (`gf_format_converter`)

The fit constants are made for four SVX layers plus XFT, so every later stage works on
6-coordinate vectors:

- A 4/5 combination becomes one fit of its four layers.
- A 5/5 combination becomes five fits. Each fit leaves out a different layer, in the
  order 0 to 4. They are sent on five consecutive clocks and marked `seq_first` /
  `seq_last`.

The Comparator treats such a group as one *sequence* and keeps at most one track from it:
the best one. This is the board's main physics improvement over fitting a fixed choice of
four layers. It costs five fits, but no extra latency beyond the five clocks.

The converter also builds the 13 *condition bits* of each fit:

- the zeta barrel of the innermost used hit (3 bits);
- the zeta barrel of the outermost used hit (3 bits);
- the layer left out (3 bits);
- the long-cluster flags of the four used hits (4 bits).

A combination with fewer than four layers cannot be fitted. It is dropped and reported
as invalid data.

### Constants and the Fit Organizer (`gf_fit_organizer`)

A constant set is 6 scalar products × 7 terms × 18 bits = 756 bits: six coefficients and
a constant term per product. Only a few hundred of the 8192 condition values are
physically distinct, so selection uses two RAMs:

- an 8192 × 8 *condition RAM* maps the 13 condition bits to a set number;
- a 256 × 756 *constant RAM* holds the sets.

Both RAMs read synchronously. A fit therefore spends two clocks in the organizer before
it is issued, with its constants, to Serializer `rr`; `rr` then advances round-robin.
Each Serializer needs six clocks per fit and at most one fit is issued per clock. So
every Serializer is free again when its turn comes, and the organizer never waits for
one.

### Fitting (`gf_serializer`, `gf_dsp_fitter`)

The Serializer captures a fit's six coordinates and its constant set in one clock. It
then presents one coordinate per clock for six clocks, each with its six coefficients.

The DSP Fitter has six multiply-accumulate lanes, modelled on DSP48 slices in MACC mode.
Each lane has an 18×25 multiplier, a product register and a 48-bit accumulator. Lane n
computes

    p_n = (c0_n << RES_SHIFT) + Σ_i c_ni · x_i ,  result_n = sat18(p_n >>> RES_SHIFT)

The six results are curvature c, impact parameter d, phi, and three chi components. The
48-bit sum is exact. `RES_SHIFT` (default 15) fixes the scale of the coefficients: the
constant term is in output units. If any result saturates, the fit is flagged
`ovf` (fit overflow).

A fit's results appear ten clocks after its Serializer is started.

### Choosing tracks (`gf_comparator`)

Three chi-square units take fits in turn. Each adds the three squared chi components in
three clocks: the first square is taken when the unit loads. Three units therefore
sustain one fit per clock, and fits leave in order.

A fit passes if it did not overflow and `chi2 <= chi2_cut`. A passing fit gets the
goodness

    q = min(chi2, 2^21 - 1) + lc_penalty × (number of long-cluster hits used)

Lower `q` is better. At the end of a sequence, the best passing fit is written to the
Track FIFO; on a tie the earlier fit wins. If no fit passed, nothing is written. The
decision for a fit is ready four clocks after it arrives.

### Flow control: where the pipeline may stop

Only two places ever wait:

- **The input FIFO.** Its almost-full output is the cable's HOLD line. It asks the
  HitBuffer to pause 16 words before the FIFO is full.
- **The Fit Organizer.** It stops popping while the Track FIFO has fewer than
  `TRK_RESERVE` (24) free places. That margin covers every fit already in the organizer,
  Serializers, fitters and Comparator.

Everything between the organizer and the Track FIFO is a fixed-latency pipeline with no
back-pressure. When the output side is slow (the GhostBuster holding the board, or the
merger serving other wedges), the Track FIFO fills and the organizer stalls. The
Combination FIFOs then fill, then the input FIFO, and finally HOLD is raised towards the
source. No word is ever lost in normal operation.

## Word formats

All cables carry 21 data bits plus End Packet (EP) and End Event (EE) marks and a data
strobe. On the real cable these are active-low and asynchronous. Here they are
active-high and synchronous to the single clock.

| Word | Layout (bit 20 first) |
|---|---|
| SVX hit | `layer[2:0]` (0-4), `zeta barrel[2:0]`, `long cluster`, `coordinate[13:0]` |
| XFT track, 1st word | `3'd5`, `3'b0`, `curvature[14:0]` |
| XFT track, 2nd word | `6'b0`, `phi[14:0]` |
| Road identifier | 21-bit road ID, with EP: closes the road packet |
| End Event | `error flags[11:0]`, `parity`, `event tag[7:0]`, with EP and EE |
| Track packet w0 | `5/5`, `overflow`, `0`, `phi[17:0]` |
| w1 | `left-out layer[2:0]`, `d[17:0]` |
| w2 | `lcmap[3:1]`, `c[17:0]` |
| w3 | `chi2[20:0]` |
| w4 | `lcmap[0]`, `5'b0`, `XFT curvature[14:0]` |
| w5 | `6'b0`, `XFT phi[14:0]` |
| w6 | road identifier, with EP |

The End Event word is the one format taken directly from the SVT protocol: 12 error
flags, one parity bit and an 8-bit tag. The parity is the XOR of every data bit of the
event's words. The hit word and the track packet layouts are this design's own. They
carry the fields the track fit needs.

Error flag bits (`gf_pkg`):

| Bit | Name | Meaning |
|---|---|---|
| 0 | `E_PARITY` | input parity wrong |
| 1 | `E_INVALID` | a road or combination could not be used |
| 2 | `E_FIT_OVF` | a fit result saturated |
| 3 | `E_FIFO_OVF` | a FIFO overflowed |
| 4 | `E_LOSTSYNC` | merged streams disagree on the event tag |

## Events, errors and merging

Each processor's End Event word carries the errors of its own event.

- **In-band errors.** The parity check, the Combiners, the format converter and the
  Comparator each OR their findings into the error field of the event's end-event
  token. That token travels through the pipeline behind the event's last combination.
  An error therefore always lands in the End Event of the event that caused it, however
  deep the pipeline is.
- **FIFO overflow.** This belongs to no event. It goes into the next End Event sent.
- **Error register.** Every error is also latched in a sticky register (`gf_error_reg`).
  A `severity` mask marks some errors as severe; a severe error raises `svt_error`.
  On the board, `svt_error` (or `freeze_req`) freezes all 30 spy buffers, so the words
  that led to the error can be read back.

The merger (`gf_merger`) is deterministic. It copies input 0 until that input's End
Event, then input 1, and so on. When every enabled input has delivered its End Event,
the merger sends one End Event with:

- the first enabled input's tag;
- the OR of all error flags;
- Lost Sync, if any tag differed;
- a parity recomputed over the merged event.

The output order depends only on the data, never on arrival times. So the board's output
for an event is always wedge 0's tracks, then wedge 1's, up to wedge 11's, then one End
Event. The testbenches rely on this.

`wedge_enable` removes wedges from the merge. Disabled inputs are skipped. Until an event
starts, the merger keeps rescanning its enables, so the enabled set may be changed
whenever the board is idle between events.

## The board (`gf_mezzanine`, `gigafitter`)

**Mezzanine.** A mezzanine holds four track processors and a merger feeding its output
FIFO. It also has nine spy buffers:

| `spy_sel` | Spy buffers |
|---|---|
| 0-3 | input cables |
| 4-7 | processor outputs |
| 8 | merger output |

**Motherboard.** The top module carries three mezzanines and three more merger stages:

- Data1 merges mezzanines 0 and 1.
- Data2 passes mezzanine 2.
- Control merges Data1 and Data2 onto the output cable.

Each stage has its own FIFO, spy buffer and error register.

**Spy read-back.** `spy_mezz` picks a mezzanine (0-2) or the motherboard (3). On the
motherboard, `spy_sel` 0 is Data1, 1 is Data2 and 2 is Control. Reads have one clock of
latency.

**Configuration ports.**

- `cfg_wedge[3:2]` selects the mezzanine and `cfg_wedge[1:0]` the wedge. The condition
  and constant RAMs of that wedge are then written through `cond_*` / `cset_*`; these
  stand in for the VME access of the real board.
- `chi2_cut`, `lc_penalty` and `severity` are shared by all wedges.

## Where this model departs from the original hardware

- **Clocking.** Everything runs on one clock, with no clock-domain crossings. The
  original mezzanine uses 120 MHz for processing, 40 MHz towards the motherboard and
  25 MHz for VME; the motherboard runs at 40 and 66 MHz.
- **Word layouts.** The hit word and the track packet layouts are this design's own (see
  above). So are the placement of the fields in the End Event word and the error bit
  assignment.
- **Hits in the track packet.** The original track packet also carries the hits used by
  the track. Seven 21-bit words hold only 147 bits, and the track parameters, chi2, XFT
  track and road identifier used here already take 144 of them. So this packet carries
  only which layer was left out and the long-cluster flags, not the hit coordinates.
- **Arithmetic choices.** The result scaling (`RES_SHIFT`) and the goodness formula `q`
  are this design's choices. The original says only that q combines chi2 with the layers
  used and the hit quality.
- **Ordering choices.** The order of combinations, the order of the five 5/5 fits, the
  strict alternation of the two Combiners and the bit order of a constant set are all
  chosen here.
- **Sizes.** The FIFO depths and the spy buffer depth (256) are chosen here; the original
  gives no sizes for them. The Combiner RAMs are 32 deep as in the original, but 18 bits
  wide instead of 19, because the hit word used here needs only 18 bits.
- **Combiner RAMs.** The XFT tracks of a road are kept in a sixth Combiner RAM, so
  several XFT tracks in one road also combine.
- **Invalid data.** A road with no XFT track, a layer with more than 32 hits, and
  combinations with fewer than four layers are reported as invalid data.
- **Lost Sync.** This is raised when the End Event tags of merged streams differ.

Not modelled:

- the VME interface and its CPLD;
- the clock managers;
- the LVDS/TTL cable drivers;
- the embedded logic analyser cores;
- the GhostBuster functions, which live on another board.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/gf_tb_pkg.sv` is a reference
model written independently of the RTL. It provides:

- road generation and cable encoding;
- the odometer order of combinations;
- the exact fixed-point fit;
- chi2, the cut, q, and the best-of-sequence choice;
- the track packet and End Event layout.

Fit constants and the condition-to-set map are pseudo-random functions of the set number
and condition (a multiplicative hash). The testbenches therefore load and predict them
without data files. Sets 250-255 have full-scale chi coefficients, so fits that use them
overflow.

| Testbench | What it establishes |
|---|---|
| `tb_svt_fifo` | head word, empty/full, HOLD threshold, count and overflow pulse against a queue model |
| `tb_gf_combiner`, `tb_gf_combiner_pair` | every combination in order; End Event tokens; rejected roads; one combination per clock with two Combiners |
| `tb_gf_format_converter` | 4/5 and 5/5 fits, condition bits, sequence marks, invalid-data flag |
| `tb_gf_fit_organizer` | constant set delivered per condition, round-robin starts, two-clock latency, hold |
| `tb_gf_dsp_fitter` | Serializer plus Fitter: exact results, saturation, fixed ten-clock latency at six-clock spacing |
| `tb_gf_comparator` | chi2, cut, overflow veto, q with penalty, best of sequence, four-clock decision |
| `tb_gf_formatter` | 7-word packets, End Event with parity and errors, hold |
| `tb_gf_merger` | merge order, enable masks, Lost Sync, error OR, parity |
| `tb_gf_spy_buffer`, `tb_gf_error_reg` | recording, wrap, freeze; sticky and per-event errors, severity |
| `tb_gf_track_processor` | random events through one wedge against the model; the timing numbers below; a 25-word road with 2048 combinations (10240 fits) |
| `tb_gf_mezzanine` | four wedges and their merger end to end, mode switch, spy read-back |
| `tb_gigafitter` | the whole board at its default size (see below) |

**Timing.** The track-processor test measures the cost of extra combinations:

- a 4/5 road with 10 combinations finishes 9 clocks after a 1-combination road;
- a 5/5 road with 10 combinations (50 fits) finishes 45 clocks after a 1-combination road
  (5 fits).

That is one fit per clock, as in the original board: about 75 ns and 375 ns at 120 MHz.

**Full board.** `tb_gigafitter` instantiates the top with all defaults: 12 wedges and
256-word spy buffers. It loads all twelve processors and sends ten events on the twelve
cables, with random gaps, honouring HOLD, while the output is held at random. The events
include:

- a 3/5 road and a wrong parity bit;
- wedges whose tags are out of step;
- fits that overflow;
- many 5/5 roads;
- a switch from all wedges to a subset that leaves one mezzanine idle, and back.

Every output word is compared with the model. Then the spy buffers are frozen, one more
event passes, and the Control and wedge-0 input spy buffers are read back. The test fails
if any of these mechanisms never occurred:

- organizer stall, HOLD, 5/5 split;
- fits passing and failing;
- fit overflow, Lost Sync, mode switch;
- invalid data and parity error.

It runs in a few seconds of simulation.

To run a testbench with Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_gigafitter rtl/gf_pkg.sv tb/gf_tb_pkg.sv tb/tb_gigafitter.sv
./obj_dir/Vtb_gigafitter
```

Replace the top module and the last file to run any other testbench.

## Changing the design

Shared widths and formats live in `rtl/gf_pkg.sv`: the coordinate width, result width,
condition bits, set index and error bits, and the packed structs for combinations, fits,
fit results and tracks.

FIFO depths, the Track FIFO reserve and `RES_SHIFT` are parameters of
`gf_track_processor`. `TRK_RESERVE` must stay at least as large as the number of fits
that can be in flight between the organizer and the Track FIFO (about 20).

If the number of Serializers `N_SER` is reduced below six, the organizer must also be
made to wait for a free Serializer. The round-robin schedule relies on six Serializers of
six clocks each.
