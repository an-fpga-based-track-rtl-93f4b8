# Hough Transform track finder segment

This is an FPGA pattern-recognition engine for a Level-1 track trigger. The
outer tracker of a collider experiment sends *stubs*. A stub is a pair of hits in two
closely spaced sensor layers, and it carries a rough momentum estimate.
The engine has to find the charged-particle tracks with transverse momentum above
about 3 GeV/c among these stubs, at one stub per clock and within a latency budget of a few microseconds.

The method is a Hough Transform, done in integer arithmetic. Take a track that comes
from the beam line and has high momentum. Seen from the beam axis, its
azimuth at a reference radius of 58 cm is

    phi58 = phi - k * (q/pT) * (r - 58 cm)

Each stub (r, phi) therefore becomes a straight line in the (q/pT, phi58) plane.
The lines of all stubs from one track cross at one point. The plane is divided
into a grid of cells. Every stub is entered into each cell its line passes
through. A cell that collects stubs from **at least five different detector
layers** is a track candidate. The stubs of every candidate cell are sent out,
together with the cell's coordinates (the track parameters).

The tracker is split into 288 regions (32 in phi by 9 in eta). Each region is
processed by one independent **Hough Segment**, which owns a 32 x 32 array of
cells: 32 phi58 rows by 32 q/pT columns. This repository holds the RTL of one
Hough Segment, `rtl/hough_segment.sv`, and its parts.

## Structure

```
           2 input links                                   2 output links
                |                                                ^
          +-----v--------------------- Book Keeper ---------------+-----+
          | link FIFOs -> merge -> stub store (512 x 64) -> lookup/format |
          +-----+--------------------------------------------------^-----+
                | stubs + readout request          track candidates |
                v                                                   |
             [Bin 0] -> [Bin 1] -> ... -> [Bin 31] -----------------+
```

Each **Bin** is one q/pT column. Stubs and track candidates move through the
Bins in the same direction, one Bin per clock. A Bin holds four units
(`rtl/ht_bin.sv`):

| unit | file | job |
|---|---|---|
| Hough Transform | `hough_transform.sv` | adds the column's phi58 change to the stub's phi (one adder); checks that the column is in the stub's bend-compatible range |
| phi58 Buffer | `phi58_buffer.sv` | turns the line's left-edge and right-edge phi58 into one or two row entries; queues the second entry in a FIFO |
| Track Builder | `track_builder.sv` | page memory of stub pointers per row; per-row counts and layer patterns; candidate marking and readout |
| Hand Shake | `hand_shake.sv` | orders the readout so that each event's candidates leave as one contiguous block |

Shared types and constants are in `rtl/ht_pkg.sv`. `rtl/sync_fifo.sv` is a
generic FIFO, used for the input links.

## The stub word and the arithmetic

Stubs arrive as 64-bit words. An upstream formatter has already prepared them:

| bits | field | meaning |
|---|---|---|
| 63:52 | `r58` | signed change of phi58 across one q/pT column, in phi units (the stub radius is pre-scaled by the column width) |
| 51:38 | `phi` | signed phi58 at the left edge of column 0, 6 fractional bits; `phi >>> 6` is the row number |
| 37:35 | `layer` | detector layer, 0..7 |
| 34:30 | `qmax` | last column compatible with the stub bend |
| 29:25 | `qmin` | first compatible column |
| 24:0 | `extra` | rest of the stub (z and so on), stored and returned but not used |

This layout is this design's own choice. The rest follows the algorithm: the
formatter supplies the layer and the compatible column range, so the per-Bin
work is one addition and two comparisons.

Column `n` sees the line enter at `L = phi + n*r58` and leave at `R = L + r58`.
Both values are computed by the Bins in turn, each Bin passing `R` on as the
next Bin's `L`. With the chosen cell size a line crosses at most two rows
within one column (|r58| < 64 phi units).

## Duplication: the phi58 Buffer

The Track Builder accepts one row entry per clock. A line can cross two rows
in one column, and it must then be entered in both. The buffer works like this:

* One valid row, or both edges in the same row: the entry goes straight on.
* Two different valid rows: the left-edge row goes on at once. A copy with
  the right-edge row goes into a FIFO (1024 x 17 bits, one 18 Kb block RAM).
* A clock with no new stub: the oldest FIFO entry is sent instead.

The FIFO is emptied only in gaps of the input stream. The buffer therefore
reports, per event parity, whether stubs are still queued or in flight
(`pend`). That event's readout in this Bin waits for them. If the FIFO is
full, the copy is lost and `ovf` pulses.

## Pages, layer patterns and even/odd events: the Track Builder

The page memory has 64 pages of 32 nine-bit pointers (one 18 Kb RAM). Each
page is one phi58 row, and there are 32 rows for even events and 32 for odd
events. An event can therefore be filled while the previous one is read out.
For every page the builder keeps:

* a stub count, which gives the write slot;
* an 8-bit pattern with one bit per detector layer.

A row is marked as a candidate once its pattern has five or more bits set. A
stub sent to a full page (32 pointers) is dropped, and `page_full` pulses.

A readout walks the marked rows in increasing row order. It emits each
pointer, oldest first, with its row and the Bin's column, at one per clock.
It then clears the counts, patterns and marks of that event half. With N
pointers in M marked rows the walk takes N + M + 3 clocks. In this RTL the
counts and patterns are register arrays, not distributed RAM.

## Readout order: the Hand Shake and the Book Keeper

Each input event ends with an end-of-packet word on every input link. The Book
Keeper then queues a **readout request** for that event. The request travels
down the stub path, one Bin per clock. A new request is issued only after the
last Bin has returned the `done` of the previous one, so only one event is read
out along the chain at a time. Meanwhile the next event keeps filling the other
half of every memory.

When the request reaches a Bin, its Hand Shake does three things in order:

1. It forwards the candidates of the upstream Bins until it sees their `done`.
2. It waits until its phi58 Buffer holds no stubs of the event.
3. It starts its Track Builder and forwards what it reads out, then sends `done`.
   A Bin without marked rows sends `done` after one clock.

The Book Keeper takes each returning pointer and reads the full stub from its
store. The store is 512 x 64 bits (36 Kb), even events in the lower half and
odd events in the upper half. The Book Keeper sends the stub with its row and
column alternately on the two output links. It marks the end of the event on
both links.

**Timing.** In Bin 0, the first candidate leaves 32 + 7 clocks after the
request. Most of this is one register per Bin. The rest is the lookup and the
start of the Track Builder walk. Every Bin that has candidates adds about 4
clocks for its own readout to start.

**Input side.** Each input link has a 16-word FIFO. The merge takes one stub
per clock, round robin when both links hold stubs. The average input rate
across the two links must therefore stay below one stub per clock.

**Error flags.** The Book Keeper flags these cases and drops the stub:

* more than 256 stubs in one event;
* a full link FIFO;
* a stub that arrives while both halves still wait for readout (`overrun`).

## Capacity against expected occupancy

| condition | stubs in per segment and event (average) | built |
|---|---|---|
| pileup 140 | about 55–60 | 256 stub slots per event; 216 clocks per event at 240 MHz with one event every 36 bunch crossings |
| pileup 200 | about 88 | same |

The averages come from whole-tracker stub counts of 16k and 25k per event,
divided over 288 segments. Peak occupancies per segment are not known here, so
only the averages have been checked. In simulation, events of 88 stubs
arriving every 216 clocks are processed without falling behind.

## Where this RTL departs from, or adds to, the reference description

These parts are taken from the reference description:

* the 32 x 32 array;
* a Book Keeper with 32 daisy-chained Bins;
* one stub per clock, and the iterative one-adder update;
* the column-range check against the Bin number;
* duplication through an 18 Kb FIFO that drains in gaps;
* 64 pages of 32 pointers with even/odd halves;
* 8-bit layer patterns and the five-layer rule;
* readout of upstream candidates before the Bin's own;
* the 36 Kb stub store and the pointer lookup.

These parts are this design's own choices:

* the stub and link word formats;
* the `done` marker that ends a candidate stream;
* the wait on the phi58 Buffer before a Bin's readout;
* one chain readout at a time;
* the Track Builder's row order and clearing;
* the even/odd halves of the stub store;
* the FIFO depths;
* the overflow behaviour;
* the output link assignment.

Known differences:

* The first candidate arrives 7 clocks later than the roughly 32 clocks of the
  reference.
* The readout time of an event grows with its number of candidates. That is
  about 4 clocks per Bin with candidates, plus one clock per candidate. The
  reference system reports a latency that does not depend on occupancy. Here
  only the input side has a fixed latency.
* Per-page bookkeeping is kept in registers rather than LUT RAM. The FPGA
  resource use is therefore not comparable with a hand-mapped implementation.
* The wider demonstrator system is not part of this RTL: source and sink
  buffer boards, the geometric processor that formats stubs and assigns
  sectors, and board infrastructure. The Hough Segment's link ports are where
  it would connect.

## Simulating

Every testbench in `tb/` checks its own results. It prints
`TB_RESULT checks=N failures=M` and then calls `$finish`.

```
verilator --binary --timing --assert -Irtl -Itb rtl/ht_pkg.sv tb/tb_hough_segment.sv \
          --top-module tb_hough_segment -Mdir obj && obj/Vtb_hough_segment
```

`tb_hough_segment` runs the full-size segment with its default parameters. It
sends 39 events:

* one event with a single cell in column 0, which checks the latency and the
  back-to-back output;
* one event with a four-layer and a five-layer track;
* one event that overfills the pages;
* 24 random events at 55 and 88 stubs;
* 12 events of 88 stubs, one every 216 clocks (the time-multiplexing period).
  The test checks that no event ever has to wait for the readout of an
  earlier one.

It compares every output word with a behavioural model of the array. It also
checks that row duplication, full pages, four-layer cells, busy links and
queued readout requests all occur. The unit testbenches are
`tb_hough_transform`, `tb_phi58_buffer`, `tb_track_builder`, `tb_hand_shake`,
`tb_ht_bin` and `tb_book_keeper`, built the same way with their own top module.

The main parameters are:

* `hough_segment`: `NBINS` = 32, `FIFO_DEPTH` = 1024, `LINK_DEPTH` = 16;
* `ht_pkg`: `MIN_LAYERS` = 5 and the field widths.

`rtl/ht_pkg.sv` lists the widths. Changing `PHI_W`, `PHI_FRAC` or `R58_W`
changes the stub word, so keep the fields' total at 64 bits.
