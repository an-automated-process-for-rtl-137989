# Streaming image-window engine for a two-FPGA board

An image-processing loop of the form "for every 3x3 window of the image,
compute one value" is compiled into hardware that splits the loop into
fixed and program-specific parts. The fixed part is a library: a *window
generator* that streams the image out of memory, and a *collector* that
stores the results. The program-specific part is the *inner loop body*
(ILB), a purely combinational circuit that computes one result from one
window. This RTL gives the library parts and two inner loop bodies for a
board with two FPGAs, joined by a 36-bit crossbar:

* **CPE0** (the control FPGA) owns a 1 MB memory holding the run-time
  constants and the source image. It reads the image and sends it over
  the crossbar, one window column per cycle.
* **PEx** (the processing FPGA) owns a 0.5 MB memory. It rebuilds the
  sliding window from the columns, runs the inner loop body, and packs the
  8-bit results into 32-bit words in its memory.

Because each FPGA has its own memory, reading and writing never compete
for a memory port. The host loads the constants and the image into CPE0
memory, resets the board, waits for `done`, and then reads the result
image out of PEx memory.

The two inner loop bodies are:

* `ilb_prewitt`, the Prewitt edge detector (the default). It computes the
  magnitude of the horizontal and vertical gradients, divided by 8.
* `ilb_threshold`, a small example. It takes the 8-bit sum `s` of the
  window and returns `s-100` if `s > 100`, else `s`.

## Block map

```
            CPE0                                         PEx
 +-----------------------------+   36-bit   +----------------------------------+
 | const_grabber --ready-->    |  crossbar  | window_gen_distribute            |
 |        |                    | =========> |   | window, store_data, row_end  |
 |  window_gen_read            |            |   v                              |
 |   ReadData: TmpBuf->InBuff  |            | ILB x TILE_ROWS (combinational)  |
 |   XBar: XbarOut, tags, NULL |            |   v                              |
 +-----------------------------+ <--done--- | collector -> mem_arb -> PEx mem  |
        ^ CPE0 memory (1 MB)                +----------------------------------+
```

| File | Role |
|---|---|
| `cameron_pkg.sv` | Crossbar word, constant record, memory widths, the NULL-rate rule |
| `const_grabber.sv` | Reads the six run-time constants from a table of addresses, then raises `ready` |
| `window_gen_read.sv` | CPE0 half of the window generator: the ReadData and XBar state machines |
| `cpe0_top.sv` | Hands the CPE0 read port from the constant grabber to the window generator |
| `window_gen_distribute.sv` | PEx half: receives the constants, then builds the shift-register window |
| `usum_many.sv`, `ilb_threshold.sv` | Threshold example ILB and its array-sum component |
| `isqrt.sv`, `ilb_prewitt.sv` | Prewitt ILB and its shift/add square root |
| `collector.sv` | Packs results into words and computes their addresses |
| `mem_arb.sv` | Fixed-priority arbiter in front of the PEx memory write port |
| `pex_top.sv` | Distribute, ILBs, collector and arbiter |
| `wildforce_top.sv` | The whole system; both memories are outside, on ports |

## Run-time constants

The first six words of CPE0 memory (set by `CONST_ADDR`) hold the following,
in order:

| Word | Constant |
|---|---|
| 0 | result address (word address in PEx memory) |
| 1 | result rows |
| 2 | result columns |
| 3 | source address (word address in CPE0 memory) |
| 4 | source rows |
| 5 | source columns |

`const_grabber` reads them one per cycle. The memory returns data one cycle
after the read enable. When it has all six, it raises `ready`. The window
generator then sends the same six words over the crossbar *before any
image data*, and PEx latches them. That is how the collector learns where
and how wide the result image is. For a 3x3 window with step 1 the host
sets result rows/columns to source rows/columns minus 2.

Images are row-major, with four 8-bit pixels per 32-bit word and the
leftmost pixel in bits 7:0. The source width must be a multiple of 4.

## The crossbar word

| Bits | Name | Meaning |
|---|---|---|
| 35 | ValidData | 0 = NULL: this cycle carries nothing |
| 34 | Start/Stop | first column of the image, and again on the last column |
| 33 | DontStore | the window completed by this column has no result to keep |
| 32 | LastCol | last column of a strip (a row of windows ends) |
| 31:0 | data | one window column: row *i* in bits 8i+7:8i |

Constant words are sent with ValidData=1, DontStore=1 and the other tags 0.

## How the image is walked: strips, frames and columns

This is the part that most needs explaining.

**Strips.** The window generator cuts the image into horizontal *strips*,
each `WIN_ROWS` rows high and the full image width wide. Without
stripmining, a strip is 3 rows high and the next strip starts one row
lower. Each strip yields one row of 3x3 windows, which is one result row.

**Stripmining.** With `TILE_ROWS = 2` (the 4x3 stripmined configuration),
a strip is 4 rows high and the next strip starts two rows lower. Two
Prewitt ILBs see window rows 0-2 and 1-3, so each window position produces
a 2x1 tile of results. The crossbar still carries one column per cycle, so
the image takes half the strips and half the time.

In general `WIN_ROWS = 3 + (TILE_ROWS-1)*STEP`, and the strip advance is
`TILE_ROWS*STEP`. Strips continue while a whole 3-row window still fits.

**Frames.** ReadData fetches a *frame* of `WIN_ROWS` words into TmpBuf:
one 32-bit word from each row of the strip, all at the same word offset.
That is four pixels from each row, so a frame holds four full window
columns. A complete frame moves into InBuff as soon as InBuff is free.
Then the next frame is fetched while InBuff waits (double buffering). The
first read of each frame is issued in the same cycle the previous frame
moves on, so a frame costs exactly `WIN_ROWS` read cycles.

**Columns.** XBar moves InBuff into XbarOut. A fixed wiring function
transposes the frame from row words into four column words. XBar then
sends one column per cycle, left to right, adding the tags:

* **DontStore** is set on the first two columns of every strip, because no
  full window exists yet. With a horizontal `STEP > 1`, it is also set on
  the columns that complete a window the step skips.
* **LastCol** is set on the last column of each strip.
* **Start/Stop** is set on the first column of the first strip, and on the
  last column of the last strip.

**Throughput.** For `WIN_ROWS <= 4`, a frame takes no longer to read (at
most 4 cycles) than to send (4 cycles). Once the pipeline is full, the
crossbar carries one valid column per cycle, and a strip of `C` pixels
takes about `C` cycles. Measured on a 256 x 256 image: 65042 cycles for
one ILB and 32531 cycles for two.

**NULLs.** XBar sends NULL words (ValidData=0) when InBuff is empty.
After every frame it also sends `NULLS_PER_FRAME` extra NULLs. Those extra
NULLs cap the window rate at what the collector can store. The
collector's lanes share one memory write port, and each lane fills one word
per four windows. With `L` lanes, a frame (4 windows) can produce up to
`2L` words, counting the partial word at a row end. So
`cameron_pkg::nulls_per_frame(L) = max(0, 2L-4)`, which is 0 for the one-
and two-lane configurations. Larger values can be set by hand. The tests
use `NULLS_PER_FRAME = 2` to exercise the mechanism.

## Rebuilding the window on PEx

`window_gen_distribute` has four phases:

1. It stores the six constants.
2. It waits for the first Start/Stop column.
3. It shifts each valid column into a 3-deep shift register. The oldest
   column drops out, and the newest becomes window column 2 (rightmost in
   the image).
4. It ends after the second Start/Stop column.

Together with the shift it registers four flags:

* `store_data` = ValidData and not DontStore;
* `row_end`, from LastCol;
* `data_end`;
* the strip number.

The window and its flags therefore appear one cycle after the column
arrives. The ILB is combinational, so the collector samples the ILB result
in that same cycle.

## Storing results

`collector` has one lane per tile row. On `store_data`, each lane puts its
8-bit result into the next byte of its word buffer. It queues a full word
for `mem_arb`, and at `row_end` it also queues the partial word. Result row
`y` starts at word `dst_addr + y*ceil(dst_cols/4)`, so every result row
starts on a word boundary. Unused bytes of a row's last word are written
as 0. In stripmined runs, a lane whose row falls below `dst_rows` drops its
values.

Each lane has a two-entry queue. `mem_arb` grants the lowest-numbered
requesting lane and writes one word per cycle through a register. `done`
rises when all three of these hold:

* the end of data has been seen;
* every queue is empty;
* the last write has left the arbiter.

CPE0's `finished` follows `done`.

## Several images at once (dot)

`N_GEN > 1` builds the form of the window generator that walks several
images of the same size in lock step. Each generator has its own TmpBuf,
InBuff and XbarOut. The columns are interleaved on the crossbar: column
*j* of generator 0, then column *j* of generator 1, and so on. Distribute
gives each generator its own shift register, `window[g]`.

The tags travel on the last generator's column. The other generators'
columns carry DontStore=1 so that they never trigger a store. The source
address of generator `g > 0` is read from CPE0 word `DOT_ADDR_BASE + g - 1`.

This path is tested at block level only. No two-window inner loop body is
included, so the tops are built with `N_GEN = 1`.

## Pixel by pixel: the element generator

A generator that hands the loop body one pixel at a time is the same
window generator with a 1 x 1 window. Set `WIN_ROWS = WIN_H = WIN_W = 1`
on `window_gen_read`, and `WIN_ROWS = WIN_COLS = 1` on
`window_gen_distribute`. Then each strip is one image row, a frame is a
single word, and each crossbar word carries one pixel. No column is marked
DontStore. Both generator testbenches run this configuration. No
per-pixel loop body is included, so the tops do not expose it.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `wildforce_top`, `pex_top` | `APP` | `ILB_PREWITT` | inner loop body (`ILB_THRESHOLD` for the example) |
| tops | `TILE_ROWS` | 1 | ILBs per window position; 2 = 4x3 stripmine |
| tops | `STEP` | 1 | window step, both directions |
| tops | `NULLS_PER_FRAME` | `nulls_per_frame(TILE_ROWS)` | extra NULLs after every frame |
| `cpe0_top`, `const_grabber` | `CONST_ADDR` | words 0..5 | where the constants live |
| `cpe0_top`, generators | `N_GEN`, `DOT_ADDR_BASE` | 1, 6 | dot form |
| `window_gen_read` | `WIN_H`, `WIN_W` | 3, 3 | size of one window (1, 1 = element generator) |
| `collector` | `FIFO_DEPTH` | 2 | words queued per lane |

The memory address widths are fixed in `cameron_pkg`. CPE0 has 18 bits,
which is 1 MB in 32-bit words. PEx has 17 bits, which is 0.5 MB. So at the
defaults, a source image of up to about 1 MB and a result image of up to
131072 words fit.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=...
failures=...` line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cameron_pkg.sv \
    tb/tb_wildforce_top.sv --top-module tb_wildforce_top
./obj_dir/Vtb_wildforce_top
```

Replace the testbench name to run any other test.

| Testbench | What it checks |
|---|---|
| `tb_wildforce_top` | Three complete systems compared against a software model: Prewitt 9x12; Prewitt stripmined 9x16; threshold with step 2 and NULL throttling at 10x12. It also counts every protocol event (constants, NULLs, each tag, double buffering, both lanes requesting at once, skipped stepped windows) and checks the crossbar rate. |
| `tb_wildforce_full` | The top at its default parameters on a 512 x 512 random image. All 65280 result words are compared. |
| `tb_prewitt_stripmine` | One ILB against two ILBs on the same 256 x 256 image. Both results are compared, and the stripmined run must take at most 55% of the cycles. |
| `tb_window_gen_read`, `tb_window_gen_distribute`, `tb_const_grabber`, `tb_cpe0_top`, `tb_pex_top`, `tb_collector`, `tb_mem_arb` | Each block against its own model, including the dot form |
| `tb_usum_many`, `tb_isqrt`, `tb_ilb_threshold`, `tb_ilb_prewitt` | The arithmetic, exhaustively or on random vectors |

`tb/wf_bench.sv` is shared by the system tests. It models both memories,
loads the constants and a random image, waits for `done`, and checks the
result against a reference that uses a real square root.

## Departures and open points

These departures are deliberate. The source description left them open or
at odds.

* **Frame shape.** A frame is one word from each window row. The other
  possible reading, one word per window column, cannot deliver whole
  columns for a 4-row window.
* **Column order.** Columns are sent left to right in image order. An
  illustration of the distribute shift register in the source suggests a
  different arrival order within a word. That order was not followed.
* **Vertical stepping.** Strip advance and the strip-end rule are this
  design's own choices.
* **Result layout.** The result layout is this design's own choice: every
  result row starts on a word boundary.
* **Collector queue and done rule.** These are also this design's own
  choices.
* **One collector only.** Inner loop bodies with several separate outputs
  (one collector each) are not built. `mem_arb` accepts several requesters,
  but only the lanes of one collector use it.
* **Combinational ILBs.** The ILBs have no pipeline registers. The Prewitt
  squarers are written as multiplications and left to synthesis. A real
  board would need a slow clock or pipelining.
* **Ideal memories and crossbar.** Both memories are assumed synchronous
  with one cycle of read latency. The crossbar is a plain wire, and both
  FPGAs share one clock.
* **Not modelled.** The host and the PCI transfers are not modelled.
* **No scalar generator.** The for-loop style scalar generator has no
  interface defined to build from, so none is included.
* **No sizes or speeds from the evaluation.** The original evaluation gives
  execution times but no image size, so its numbers cannot be reproduced
  exactly. The result that can be checked is the ratio: stripmining
  roughly halves the computation time. This design gives 0.50.
