# Level0 digital trigger for a free-running, continuously read-out DAQ

In a free-running data acquisition nothing waits for a trigger: every
front-end streams all of its hits, cut into fixed **time slices**, and each
slice into shorter **images**. To reduce that stream online, a digital trigger
has to find hits from different detectors that belong to the same particle.
That is hard for two reasons. Different detectors and channels see the same
particle at different times, so the raw times are not aligned. And hits of the
same moment arrive on different links, in arbitrary order.

This RTL is the first trigger stage (Level0) of such a system, following the
proposal "A Digital Trigger for the free running iFDAQ". It does four things:

1. It decodes the slice/image/group structure of every link.
2. It maps (front-end, channel) to a detector channel and applies two timing
   corrections: a coarse one in whole images, per front-end, and a fine one
   (T0) in TDC units, per channel.
3. It merges all hits into one stream and sorts them by corrected time. A
   **parallel insertion sorter** does this at one hit in and one hit out per
   clock.
4. It cuts the sorted stream into events with a time gate: a hit within
   `T_cut` = 25 TDC units of the event's first hit joins that event. Events
   with at least two hits are flagged as coincidence candidates for the next
   trigger level.

```
 link 0 ──► raw_decoder ─┐
 link 1 ──► raw_decoder ─┤  link_merger      channel_map     time_correction    hit_buffer           event_builder
   ...                   ├─► (FIFO per link, ─► {fe,ch}→det ─► key={img,t}     ─► sorting_array of  ─► T_first<T<T_first+T_cut
 link 63 ─► raw_decoder ─┘   round robin,       lookup table     −ctc[fe]·2^14      128 sorting_cells    → tagged hits
                             slice hold)                         −t0[det]           (3-image window)     → event records
```

All modules use one clock and a synchronous active-high `reset`.

## Link words and the decoder (`raw_decoder`)

Each link carries one 32-bit word per cycle (`enable` = word valid). The
original proposal gives the nesting of the format and the field names. It does
not give a bit layout, so the layout in `l0_pkg` is this design's own: the top
three bits give the word type, and the fields sit below them.

| `[31:29]` | word | fields |
|---|---|---|
| `001` | slice header, 1st word | `[19:0]` slice number |
| `001` | slice header, 2nd word | `[28:0]` start time of the slice |
| `010` | image header | `[28:0]` image time; its low 10 bits are the image number |
| `011` | group header | `[22:13]` source id, `[12:8]` view id, `[7:0]` front-end id |
| `110` | hit | `[20:14]` channel id, `[13:0]` hit time within the image |
| `101` | additional data | `[28:0]` payload, passed out unchanged |
| `100` | group trailer | `[15:0]` check word, passed out unchecked |
| `111` | end of slice | — |
| `000` | fill | ignored |

The field widths follow the decoder signals of the original design: 29-bit
slice and image times, 8-bit front-end id, 7-bit channel id, 14-bit hit time.
The state machine follows the original state diagram:

```
raw bit stream → begin of slice → begin of slice (2nd word) → begin of image → begin of group (×N)
→ data (×N) → additional data (×N) → end of group (×N) → { begin of group | begin of image | end of slice }
```

The hit-data state can go straight to end of group. An empty slice may end
after either slice-header word. A word that the diagram does not allow pulses
`error`. It also pulses `end_of_slice`, so that the merge stage does not wait
forever, and the machine returns to the raw-bit-stream state until the next
slice header. Two consequences of following the diagram strictly:

- An image header must be followed by a group, and a group must contain at
  least one hit. A front-end with nothing in an image simply omits that image.
- Additional-data words may only follow the last hit of a group.

A hit word accepted at clock *n* appears on `hit_valid`/`hit` after clock *n*+1. The header
fields stay on their outputs until the next header of their kind.
`first_hit_in_group` holds the hit time of the first hit after the latest
group header.

## Merging the links, slice by slice (`link_merger`)

Each link has a 16-entry FIFO. A round-robin arbiter forwards one hit per
cycle, starting after the link it served last. The end-of-slice word travels
through the FIFO as a marker. When a link's marker reaches the FIFO head, that
link is **held**: what follows in its FIFO belongs to the next slice. When
every link is held, `slice_end` pulses. The pulse is delayed by the 3-cycle map
and correction pipeline and becomes the sorter's `flush`. Once the sorter is
empty (`flush_done`), the event builder closes its open event and all links are
released.

A hit that finds at most one free FIFO entry is dropped and counted in
`fifo_dropped`. The last entry is kept for the marker, so a flood cannot stall
the end of a slice. The per-slice hold, the FIFOs and the drop policy are this
design's own; the original only says that data from different sources are
merged.

## Channel map and timing corrections

`channel_map` is a 2^15-entry table addressed by `{front-end id, channel id}`.
It returns a 16-bit detector channel.

`time_correction` builds the **sort key**, a 24-bit number that orders hits in
global time:

```
key = ({image[9:0], time[13:0]} − (ctc[fe] << 14) − t0[det])  mod 2^24
```

- `ctc[fe]` is the coarse correction: a whole number of images, one value per
  front-end. It moves a late front-end's images back into line.
- `t0[det]` is the fine correction: a signed number of TDC units, one value
  per detector channel.

Putting the image number on top of the time makes one image exactly 2^14 TDC
units of key. A fine correction that crosses an image boundary therefore
borrows from the image number, as it should. The real image width in TDC units
is not given in the original, so this is an assumption that sets the unit of
"image" in the key. A positive correction makes a hit earlier.

All three tables are plain register arrays with write ports (`map_*`, `ctc_*`,
`t0_*`). Their contents are undefined after reset and must be loaded first. In
the original the coarse correction is applied in the front-ends. It is
provided here too; load zeros if the front-ends already apply it.

## The parallel sorter (`sorting_cell`, `sorting_array`)

This is the core of the design. The sorter is a chain of 128 cells of 40 bits.
Each element is `{key[23:0], det[15:0]}`, so comparing whole words orders by
time, with ties ordered by channel. The occupied cells always form a prefix,
in ascending order, with the smallest element in cell 0.

**Write.** An incoming element is broadcast to all cells. Each cell decides
locally, in the same cycle, from its own content and the cell above it:

- An empty cell claims the incoming element if the cell above is occupied.
- An occupied cell claims the incoming element if it is smaller than its own
  element and the cell above does not kick out its element.
- If the cell above kicks out its element, this cell must take it, whatever
  its own state.
- An occupied cell that takes new data kicks out its old element to the cell
  below.

Cell 0 sees an occupied cell above it (`FIRST=1`). Example: cells `2, 4,
empty`, input 3. The cell holding 2 keeps it. The cell holding 4 claims 3 and
kicks out 4. The empty cell must take the 4. Result: `2, 3, 4`. The kick-out
signal ripples down the chain, so an insert costs one clock whatever the fill
level. The price is one comparator per cell.

**Read.** A read removes the smallest element. Every cell takes its lower
neighbour's content at once (`prev_cell_data_pulled` ripples down from
`read`).

**Read and write in the same cycle.** Each cell first computes its write-phase
result (`cell_wdata`/`cell_wstate`). On a read, it loads its lower
neighbour's write-phase result instead of its own. So the returned element is
the smaller of the new element and the stored minimum, and the occupancy is
unchanged.

Below the last cell sits a permanently empty virtual place that follows the
empty-cell rule. It catches whichever element would fall off a full array, so
that a simultaneous read pulls it back. A write into a full array without a
read loses the largest element and pulses `overflow`.

**Neighbour marks.** `keep_data` marks a cell whose key is within
`KEEP_GATE` (25) of an occupied neighbour. The element that leaves on a read is
marked (`rd_keep`) when the next stored element or the previously read element
is within the gate. The original asks for marking "cells with neighbours in a
time gate" without giving the gate; 25 is borrowed from `T_cut`.

Port names of the cell (`prev_cell_data`, `prev_cell_data_pushed`,
`prev_cell_data_pulled`, `prev_cell_state`, `cell_data_is_pushed`,
`cell_data_is_pulled`, `keep_data`, `cell_state`) are those of the original
cell. `write` and the lower-neighbour inputs are added because a parallel read
needs the neighbour below. Each cell stores 40 data bits and one state bit, so
128 cells hold 128 × 41 = 5248 flip-flops. That is the flip-flop count quoted
for the original 128-cell test implementation.

## The hit buffer window (`hit_buffer`)

The sorter is used as a buffer spanning three consecutive images. While hits
of image *k* arrive, image *k*−1 is held so that late hits of other links can
still be merged in. Image *k*−2 and older are read out in time order, one hit
per cycle.

Here *k* is the highest image number written since the slice began. So a link
may lag by up to one image, including hits moved back one image by the coarse
correction, and the output stays exactly sorted. The window width is the
parameter `NUM_IMAGES` (default 3). A window of *w* images tolerates a lag of
*w*−2 images. Use a wider window if sources arrive further apart, for example
when a coarse correction of three images also means the data arrive three
images late. A wider window needs more cells. If a write finds the buffer
full, the smallest hit is read out at once (`early_releases` counts this). The
output may then be out of order, but no hit is lost. At the end of a slice,
`flush` drains everything, then `flush_done` pulses and *k* restarts at 0,
because image numbers restart in every slice.

## Event building (`event_builder`)

The gate is the original one:

```
T > T_first  &&  T < T_first + T_cut          (T_cut = 25)
```

A hit that passes joins the open event. Any other hit, including one with
exactly the first hit's time, opens a new event. Every hit leaves one cycle
later with its event number (`hit_event`) and its time relative to the
event's first hit (`hit_rel_time`).

When an event closes (the next event opens, or `close` at slice end), its
record goes out: `ev_id`, `ev_time` (= T_first), `ev_nhits`, and
`ev_candidate` (at least `MIN_HITS` = 2 hits). Which events count as "of
interest" is not fixed in the original, so all events are reported and the
flag is left to the next stage.

## Parameters of `level0_trigger`

| parameter | default | origin |
|---|---|---|
| `NUM_LINKS` | 64 | optical links of the target FPGA card |
| `FIFO_DEPTH` | 16 | own choice |
| `NUM_CELLS` | 128 | size of the original sorter test implementation (40-bit cells) |
| `NUM_IMAGES` | 3 | original: the hit buffer spans three consecutive images |
| `KEEP_GATE` | 25 | own choice (= `T_CUT`) |
| `T_CUT` | 25 | original event-building gate |
| `MIN_HITS` | 2 | own choice |

The field widths are in `l0_pkg`: 20-bit slice number, 29-bit times, 10-bit
source id, 5-bit view id, 8-bit front-end id, 7-bit channel id, 14-bit hit
time, 10-bit image number, 16-bit detector channel.

## Latency and rates

| path | latency |
|---|---|
| link word → decoded hit | 1 cycle |
| decoder → merger output | ≥ 2 cycles (FIFO + register) |
| merger → channel map → corrected key | 1 + 2 cycles |
| key → sorter | 0 cycles (written on arrival) |
| sorter read → `out_*` | 1 cycle |
| sorted hit → tagged hit | 1 cycle |

Throughput is one hit per cycle for the whole stage, after the merge. How long
a hit stays in the sorter depends on the image window, not on the clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself on a watchdog.

| testbench | what it checks |
|---|---|
| `tb_raw_decoder` | generated slices, a worked example with images 1000 and 1023, the largest slice number, every hit and header field, fill and additional-data words, empty slices, an illegal word (error, slice closed, wait for next header), 1-cycle latency |
| `tb_link_merger` | 4 links: every hit once and in per-link order, hold until release, one `slice_end`, round-robin interleaving, drops counted |
| `tb_channel_map` | random table contents, lookups, 1-cycle latency |
| `tb_time_correction` | corrected key against integer arithmetic, 2-cycle latency |
| `tb_sorting_cell` | each rule, pull, neighbour gate edges, enable, reset, then 3000 random cycles against a direct model of the rules |
| `tb_sorting_array` | 128 cells against a sorted-queue model: fill at one per cycle, overflow, drain, 4000 random read/write/both cycles, full array under read+write, a short hand-written sequence read back in order |
| `tb_hit_buffer` | 16 cells, four-image window: sorted output with hits two images late, release only three images back, flush, burst with forced reads and no loss |
| `tb_event_builder` | gate edges (+24 joins, +25 and equal time do not), 2000 hits against a model, a three-hit worked example |
| `tb_level0_trigger` | whole design at default size, described below |

`tb_level0_trigger` runs the full design with no parameter overrides: 64
links and 128 cells. It first loads all tables. It then sends three slices:

- **Slices 1 and 2.** Three simulated particles per image leave hits on many
  links. Some links need a one-image coarse correction, and fine corrections
  are spread over ±20. Noise hits, fill words and additional data are mixed
  in. In slice 2, one link sends an illegal word.
- **Slice 3.** A burst of 3840 hits, far more than the FIFOs and the sorter
  hold.

For slices 1 and 2 a model computes every corrected time, sorts the hits and
builds the events. The testbench compares every output hit and every event
record in order. For slice 3 it checks that delivered plus dropped equals sent,
and that the event records account for every delivered hit. It also requires
every mechanism to occur at least once: decode error, FIFO drop, link hold,
forced early read, slice flush, candidate and single-hit events, and neighbour
marks.

To run a testbench with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/l0_pkg.sv tb/tb_words_pkg.sv tb/tb_level0_trigger.sv \
  --top tb_level0_trigger -o sim -Mdir obj
./obj/sim +verilator+rand+reset+2
```

Only the two packages are named. Verilator finds each module in
`rtl/<module>.sv` through `-Irtl`. Replace `tb_level0_trigger` with another
testbench's name to run that one. The full-size run simulates in well under a
second.

## Departures from the original and limits

- **Own choices.** The link word layout, the slice handshake between the
  stages, the FIFOs and drop policy, the table formats and load ports, the
  release rule of the three-image window, the full-buffer policy, the
  neighbour gate width and the candidate rule are all this design's own. The
  original gives the structure, not these details.
- **Group trailer.** The check word is not verified, because its code is not
  specified.
- **Relative hit times.** In the original's example event records, some hit
  times are negative, relative to a reference that is not explained. Here they
  are always measured from the event's first hit, so they are never negative.
- **Decoder outputs not used by the trigger path.** Header fields, additional
  data and trailers come out of `raw_decoder` but are not used further.
- **Slices.** Sort keys are only unique within a slice (10-bit image number),
  so the sorter is drained at every slice end. Hits of a link that lag more
  than `NUM_IMAGES`−2 images, after correction, leave the sorter out of order.
- **Not built.** The later trigger levels (muon identification, target
  pointing, the kink/tracking trigger, di-muon selection), the distribution of
  trigger decisions on the timing system, the data concentrators that keep two
  images per trigger, and the calibration runs that find the coarse and fine
  corrections (histograms of image and time differences to a reference
  detector) are outside this RTL. The corrections enter through the table load
  ports.
- **Sizes.** All defaults are the original numbers where it gives one. The
  mapping and T0 tables (2^15 × 16 and 2^16 × 16 bits) are meant for block
  RAM.
