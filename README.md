# Single-pass connected components analysis with per-row label reuse

This core finds the 8-connected regions of a binary image streamed in raster
order and measures the area of each one, without storing the image or a
labelled copy of it. Each region's area leaves the core at the end of the
first row that no longer touches the region. That is one row of latency,
not one frame.

The classic approach labels the image in one pass, resolves label
equivalences, and relabels in a second pass, so it has to buffer the whole
image. A single-pass variant can instead accumulate features per label while
it scans. Its tables then still need one entry per label ever issued, up to a
quarter of the pixel count. This design reissues labels on every row,
counting from 1 again. A row holds at most `IMG_W/2` separate runs, so every
table has `IMG_W/2` entries, and memory grows with the image width instead of
the image area. For a 640x480 image the whole state is about 30 kbit.

## How a row is processed

Three kinds of label meet at every pixel:

* **previous-row labels**: the labels the row above was given, read back
  from the row buffer;
* **representatives**: a previous-row label resolved through the merger
  table PM to the smallest label of its region. Two labels of the previous
  row may belong to the same region, because they merged later on that row;
* **current-row labels**: a representative is mapped to one through the
  translation table T once its region has been met on the current row.

The window holds A, B, C (above-left, above, above-right) as
(representative, current label) pairs, and D (left) as a current label. The
label of an object pixel is chosen by a fixed decision tree
(`cca_label_select`):

| condition (tested in this order)              | label        |
|-----------------------------------------------|--------------|
| pixel is background                           | 0            |
| D'' = 0, B object                             | B'' or new   |
| D'' = 0, B background, C'' != 0               | C''          |
| D'' = 0, B background, C'' = 0                | A'' or new   |
| D'' != 0, C'' != 0                            | C''          |
| D'' != 0, C'' = 0                             | D''          |

Here X'' is the current-row label of neighbour X, and 0 means "none yet".
"B'' or new" means B'' if it is not 0, otherwise the next free label.

Then, in the same clock:

* Every object neighbour that had no current label yet takes the chosen label.
  The core writes T, deletes that region's entry in the previous-row data
  table PD, and adds the entry's area to the pixel's region. Two separate
  regions of the previous row can join this way at the bottom of a "U". The
  translation table alone records that merger, and the label that would have
  been used for the second arm stays free.
* If C'' is chosen while D'' (or, with no D, A'') holds a different current
  label, two labels of this row have turned out to be one region. C'' was
  always issued earlier, so it is the smaller label, and no comparator is
  needed. The areas are added into C''. The other label's entry in the
  current data table CD is deleted, and the pair (other, C'') is pushed on
  the merger stack.
* The area of the run being scanned lives in a data-cache register (DC).
  It is written to CD only when the run ends, at the next background pixel
  or the last column. If the run is merged into another label before it
  ends, its cached area goes into that label and is never written under its
  own label.
* A new label is initialised in the current merger table CM (CM[l] = l).
* The label is written to the row buffer for the next row.

### End of a row

1. **Unwind the merger stack.** Pairs are popped newest first and each one
   sets CM[big] = CM[small]. On a row, the smaller label of each pair lies to
   the right of the larger. Taking the pairs in reverse row order therefore
   resolves chains (3 to 2, then 2 to 1) in a single pass. Each pair takes
   one cycle.
2. **Emit completed regions.** Every PD entry still valid belongs to a region
   that the row just finished did not touch, so that region is complete. The
   entries are read out one per cycle, lowest label first, on
   `region_valid`/`region_area`.
3. **Swap.** CM becomes PM and CD becomes PD. The old PD is emptied and
   reused as CD. T is cleared.
4. **Prime the window.** Two cycles load columns 0 and 1 of the row just
   finished into the window.

After the last row of a frame, step 2 runs once more on the swapped tables.
This emits every region that reaches the bottom edge, and then `frame_done`
pulses.

## Interface and timing (`cca_top`)

| port             | dir | width | meaning                                              |
|------------------|-----|-------|------------------------------------------------------|
| `clk`, `rst_n`   | in  | 1     | clock; asynchronous active-low reset                 |
| `pix_valid`      | in  | 1     | a pixel is offered                                   |
| `pix`            | in  | 1     | 1 = object, 0 = background, raster order             |
| `pix_ready`      | out | 1     | the pixel is taken when `pix_valid && pix_ready`     |
| `region_valid`   | out | 1     | one completed region this cycle                      |
| `region_area`    | out | DW    | its area in pixels                                   |
| `frame_done`     | out | 1     | every region of the frame has been emitted           |
| `stack_overflow` | out | 1     | a merger pair was lost in this frame (sticky)        |
| `label_overflow` | out | 1     | a row needed more than LABELS labels (sticky)        |

The core takes one pixel per clock while `pix_ready` is high. Between two rows
`pix_ready` stays low for 4 + (stack pairs) + (completed regions) cycles.
After the last row it stays low for one more cycle per region still open.
The source has to provide this as horizontal blanking or stall. The core
does not count pixels from outside: it assumes frames of exactly
`IMG_W x IMG_H` pixels, back to back. `region_valid` has no back-pressure.
Both overflow flags clear when the next frame starts.

Cycles per 640x480 frame are 307,200 pixels plus the row overhead. That is
309,121 cycles for an empty image, or 131 frames/s at 40.6 MHz. The
worst-case image of isolated pixels needs 385,921 cycles (105 frames/s).

## Parameters and sizes

| parameter     | default | meaning                                           |
|---------------|---------|---------------------------------------------------|
| `IMG_W`       | 640     | pixels per row                                    |
| `IMG_H`       | 480     | rows per frame                                    |
| `DW`          | 19      | area width (640x480 = 307,200 < 2^19)             |
| `LABELS`      | IMG_W/2 | labels per row; labels are `clog2(LABELS+1)` bits |
| `STACK_DEPTH` | IMG_W/4 | merger pairs per row                              |

A row can never need more than `IMG_W/2` labels, because a new label
is only issued at the start of a run. `IMG_W/4` merger pairs is the worst case
given for this scheme; it was never exceeded in testing, and `stack_overflow`
reports it if it ever is. `LABELS = 128`,
`STACK_DEPTH = 16` is a smaller build for ordinary images with a few
thousand regions. If a row exceeds these limits, that frame's results are
wrong and the matching overflow flag says so.

At the defaults the state is: row buffer 640x9, two merger tables 2x321x9,
two data tables 2x321x19, stack 160x18, translation table 321x9, plus valid
bits. That is about 29.5 kbit in total. Entry 0 of each table stands for
background and is never used.

## Blocks

| file                          | block                                                      |
|-------------------------------|------------------------------------------------------------|
| `rtl/cca_pkg.sv`              | label-select outcome and sequencer state enums             |
| `rtl/cca_row_buffer.sv`       | previous-row labels, 1 write + 1 asynchronous read port    |
| `rtl/cca_neighbourhood.sv`    | A, B, C, D window, translation update and forwarding       |
| `rtl/cca_label_select.sv`     | the decision tree above (combinational)                    |
| `rtl/cca_translation_table.sv`| T, two write ports, one-cycle clear via valid bits         |
| `rtl/cca_merger_table.sv`     | PM/CM pair with bank swap                                  |
| `rtl/cca_merger_stack.sv`     | LIFO of merger pairs, overflow flag                        |
| `rtl/cca_data_table.sv`       | CD/PD area tables, deletion, completed-region read-out     |
| `rtl/cca_top.sv`              | label allocation, data cache, area combination, sequencer  |

## Where this design makes its own choices

* **Everything happens in one cycle.** Every table is a register array with
  asynchronous reads. In one clock a pixel's neighbours are looked up
  (row buffer, then PM, then T), its label is chosen, and all tables are
  written. The scheme this follows spreads that work over about three
  pipelined cycles, so that block RAM can be used. That
  pipeline is not built here. Expect a long combinational path (row buffer
  to PM to T to decision tree to adders to table write enables) and
  distributed-RAM or flip-flop tables rather than block RAM.
* **Reset between rows uses valid bits.** T and the data tables are cleared
  in one cycle by clearing valid bits, instead of being rewritten entry by
  entry during the next row. CM needs no reset, because every label is
  initialised when it is issued.
* **Completed regions are read out through a priority encoder** over PD's
  valid bits. This costs one cycle per completed region, not one per table
  entry.
* **The end-of-frame flush, the handshake and the overflow flags** are
  additions that the scheme leaves open.
* **Only area is measured.** Any feature that accumulates by addition
  (moments, sums of pixel values) needs a wider `DW` and a wider adder in
  `cca_top`. Bounding boxes need a different combination operation in the
  same place.

## Simulating

The testbenches need Verilator 5 with `--timing`. From the folder holding
`rtl/` and `tb/`, run for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cca_pkg.sv tb/tb_cca_top.sv \
          --top-module tb_cca_top -Mdir obj_top
obj_top/Vtb_cca_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

* `tb_cca_top`: 200 frames of 24x16 pixels, back to back, with random
  input gaps. The frames are random images of several densities, nested U
  shapes, combs, and isolated dots. An independent flood-fill reference
  labels each stored image. Every region must come out once, with the right
  area, in the end-of-row read-out right after its last row (or in the
  flush). The bench also counts new labels, translations, joins of two
  previous-row regions, stack pushes and pops, completions within a frame,
  flushes, and back-pressure. A mechanism that never occurs is a failure.
  On every frame it also checks the cycle count: one pixel per clock within
  a row, and exactly 4 + pairs + regions cycles between rows.
* `tb_cca_full`: the same checks at the default 640x480 size. It runs four
  frames, one of them the worst case of 320 isolated pixels on every other
  row. It finishes in about 10 s.
* `tb_cca_typical`: `LABELS=128, STACK_DEPTH=16` at 640x480. A frame of
  about 1,200 blobs must be exact, and the isolated-dot frame must raise
  `label_overflow`.
* `tb_cca_example`: a hand-worked 18x6 image. Its last two rows contain a
  "U" closed only through the translation table, and two chained current-row
  mergers. The bench checks the label given to every object pixel of those
  rows, PM at the start of the last row, the order of the stack pops, CM
  after unwinding, that a run merged away is never written from the data
  cache, and the three areas emitted.
* One bench per block (`tb_cca_row_buffer`, `tb_cca_neighbourhood`,
  `tb_cca_label_select`, `tb_cca_translation_table`,
  `tb_cca_merger_table`, `tb_cca_merger_stack`, `tb_cca_data_table`). Each
  checks its block against a model of its own. The label-selection bench is
  exhaustive over small label values.

## Known limits

* The one-row latency holds. The "input data rate" claim holds only if the
  source gives the core its per-row blanking.
* Correctness rests on one claim: a current-row label that has been merged
  away is never seen again later on the same row. The argument is
  planarity: two disjoint regions cannot interleave along a row. An
  assertion in `cca_top` checks that the kept label of every merger is the
  smaller one. Randomised testing against the reference has found no case
  that breaks the claim, but it is not proven.
* Frame length is fixed by `IMG_W` and `IMG_H`. There is no start-of-frame
  input to recover from a dropped pixel.
