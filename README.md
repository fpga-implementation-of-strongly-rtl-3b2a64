# Parallel local histogram equalisation for FPGA

Some image-processing pipelines equalise the histogram of a small window
instead of the whole image. A neural-network face detector is an example: it
looks at every 20x20 window of the image, moving one pixel at a time, and each
window is histogram-equalised before it reaches the network. For a 512x512
image that is 492 x 492 windows and about 10^8 pixel counts per image scale.
A processor is too slow for this. This RTL does the equalisation in hardware.
It is built around three ideas:

* **A histogram in block RAM, one pixel per clock.** A dual-port RAM holds one
  counter per grey level. One port reads a bin and the other writes it back
  incremented, so a new pixel enters every clock.
* **Differential update.** When the window moves one row down, the new
  histogram is the old one minus the row that left and plus the row that
  entered. That is 2*W pixels instead of W*W (40 instead of 400). The
  histogram memory also needs no clearing between windows.
* **Several windows at once.** A grid of N_H x N_V equaliser blocks works on
  neighbouring windows. The blocks share one pixel stream over the rectangle
  that covers all their windows, and each block keeps only its own pixels.
  The external memory is read once for all of them.

The architecture follows the paper "FPGA Implementation of Strongly Parallel
Histogram Equalization". That paper's implemented system is one equaliser
block on an IBM CoreConnect On-chip Peripheral Bus (OPB), and that is this
RTL's default. The grid of blocks, which the paper analyses, is a parameter.

## Equalising one window

A block handles one W x W window of K-level pixels. The defaults are W = 20
and K = 256 (8-bit pixels). The work takes three steps:

1. **Histogram.** The window's pixels enter the histogram input
   (`hist_valid`, `hist_dec`, `hist_pix`) one per clock (400 clocks). A
   differential step instead sends 20 pixels to be decremented and 20 to be
   incremented (40 clocks).
2. **Read and program (131 clocks by default).** The histogram is read two
   bins per clock, one through each RAM port (128 clocks). Each pair of bins
   goes through the equation module, and the two new table entries go into
   the LUT through both of its ports. One clock drains the histogram pipeline
   and two more empty the read pipeline. With `LANES` = 2 or 4 the RAMs are
   banked and 4 or 8 bins are read and written per clock, so this step takes
   3 + 128/`LANES` clocks (67 or 35). If the *clear* option is set, each bin is
   zeroed as it is read. Use it when the next window will be computed from
   scratch. Leave it off when the next window is a differential step.
3. **Convert (400 clocks, or 200 with two lanes).** The window's pixels are
   sent again, to the conversion input (`conv_valid`, `conv_pix`). Each one
   addresses the LUT, and its equalised value appears on `out_pix` one clock
   later. With `CONV_LANES` = 2 two pixels are converted per clock, one
   through each LUT port.

Steps 1 and 3 use different RAMs and have separate inputs, which may be used
in the same clock. While one window is converted, the histogram of the next
can be computed. Step 2 needs both RAMs and runs alone; both inputs are
refused (`ready` low) during it.

The new table entry for grey level k is the scaled cumulative histogram:

    v_k = floor( (K-1) * (h[0] + h[1] + ... + h[k]) / (W*W) )

With the defaults this is floor(255 * cdf / 400). The division is by a
constant. If the histogram holds more than W*W pixels (a misuse), the result
is held at K-1.

With the steps overlapped, a window moving one row down takes
max(40, 400) + 131 = 531 clocks with the defaults. With two conversion lanes
and four banks it takes 200 + 35 = 235 clocks. Run one after another, as the
bus interface does, a differential step takes 40 + 131 + 400 = 571 clocks.

## The histogram pipeline (`hist_calc`)

This is the part that takes the most care. A block RAM read is synchronous,
so the count of pixel p is only available one clock after p is presented. A
plain read-modify-write would therefore take two clocks per pixel. The RAM
is instead split by port:

    clock t    : pixel p_t addresses port A (read)
    clock t+1  : port A gives count(p_t); count +/- 1 is written through
                 port B at address p_t, while p_{t+1} is read on port A

There is one hazard. If p_{t+1} == p_t, port A reads the bin in the same
clock that port B writes it, and gets the old count. The block keeps the last
written address and value, and when the next pixel hits the same bin it uses
them instead of the RAM output (the bypass). A pixel two clocks later reads
the RAM after the write has landed, so one register is enough.

In read mode both ports are switched to the reader by the address
multiplexers. Each port reads one bin, two per clock. With `LANES` > 1 the
RAM is split into `LANES` banks, with bin k in bank k mod `LANES`. A read
then addresses one row of `LANES` bins on each port, and the banks behave as
one RAM that is `LANES` bins wide. A pixel update touches only its own bank. The RAM is read-first,
so a port that writes zero in the same clock still returns the old count.
That is how clearing happens during the read.

After reset the block clears its own RAM, two rows per clock (128/`LANES` clocks),
and holds `ready` low until it is done. A decrement of an empty bin wraps
around. Callers must only decrement pixels that they counted.

## The LUT memory (`lut_mem`) and equation module (`equalization`)

The LUT is a second dual-port RAM, banked like the histogram, with two roles.
While the table is programmed, the equation module drives both ports and
writes two rows of `LANES` entries per clock. During conversion, port A is
addressed by the pixel of lane 0 and port B by the pixel of lane 1. The
equation module keeps a running sum across the bins, in order. For each pair
of rows it registers the row numbers 2i and 2i+1 and their 2*`LANES` values,
one clock after the bins arrive.

## Several windows at once (`hist_equ_array`)

Block (i, j) of an N_H x N_V grid owns the window whose top-left corner is
column i, row j of a *union rectangle* of (W+N_H-1) x (W+N_V-1) pixels. Each
pixel is sent once, with its coordinates, to every block. A block takes the
pixel only if it lies in its own window. This holds for the histogram input
(`hist_x`, `hist_y`) and for each conversion lane (`conv_x`, `conv_y`).
`out_valid[k][c]` and `out_pix[k][c]` carry block k's result for lane c. All
blocks run in lock-step and share `ready`, the start of programming and its
timing.

Pixels sent per update:

| update                              | pixels                 | W=20, 4x2 grid |
|-------------------------------------|------------------------|----------------|
| full, 1-D grid (N_V = 1)            | W (W+N_H-1)            |                |
| full, 2-D grid                      | (W+N_H-1)(W+N_V-1)     | 23 x 21 = 483  |
| differential step, 1-D grid         | 2 (W+N_H-1)            |                |
| differential step, 2-D grid         | 2 N_V (W+N_H-1)        | 2 x 2 x 23 = 92 |

A block is busy W^2 clocks out of (W+N_H-1)(W+N_V-1). For a fixed number of
blocks a square grid loses less to this than a single row. A differential
step, however, costs 2*N_V rows, so for histogram updates a wide, flat grid
is cheaper. The paper's analysis weighs the two and favours N_H about
3 x N_V.

For a **differential step** (`hist_diff` = 1), every window moves one row down.
Block row j must remove its old top row (union row j) and add the row below
its old window (union row j+W). These rows are sent as two strips of N_V rows
each:

* rows 0 .. N_V-1 with `hist_dec` = 1;
* rows W .. W+N_V-1 with `hist_dec` = 0.

`hist_y` then counts rows within the strip, and block row j takes strip row j.
Conversion always uses full union coordinates. There is no differential
conversion: every pixel of every window is looked up.

## Bus interface (`opb_hist_equ`)

The peripheral is an OPB slave. All OPB signals use bit 0 as the least
significant bit, unlike IBM's big-endian numbering.

| offset    | register | write                                                            | read                                                          |
|-----------|----------|------------------------------------------------------------------|---------------------------------------------------------------|
| 0x00      | CTRL     | [1:0] op (0 inc, 1 dec, 2 convert), [4] clear, [5] diff, [8] start | [1:0] op, [4] clear, [5] diff, [16] busy, [17] ready, [18] done |
| 0x04      | DATA     | four pixels, byte 0 first; a byte with its enable low is skipped | 0                                                             |
| 0x40 + 4k | RESULT_k | -                                                                | block k's equalised pixels of the last DATA word, same lanes  |

Block k sits at column k mod N_H, row k div N_H. A RESULT lane reads 0 when
its byte was skipped or its pixel lies outside block k's window. At most 48
blocks fit the address range.

The peripheral generates the pixel coordinates itself. Any CTRL write resets
the position to (0, 0). Each pixel taken from DATA advances the column, which
wraps to the next row after W+N_H-1 pixels. Skipped bytes do not advance it.
So software streams the union rectangle in raster order. Where a row does not
start or end on a 32-bit word boundary, the edge words go out with partial
byte enables.

A typical sequence for one block, or for one union of a grid:

    CTRL  = op 0 (inc)              ; DATA x (union pixels / 4)
    CTRL  = start, clear 0          ; table programming, 131 clocks
    CTRL  = op 2 (convert)          ; held until programming ends
    repeat: DATA = 4 pixels, read RESULT_0 .. RESULT_{N-1}
    ; next union, one row down, differentially:
    CTRL  = op 1, diff 1            ; DATA: strip of rows 0..N_V-1
    CTRL  = op 0, diff 1            ; DATA: strip of rows W..W+N_V-1
    CTRL  = start, clear 0 or 1     ; and convert as before

The DATA register feeds the histogram input when op is 0 or 1 and the
conversion input when op is 2. So over the bus the two steps run one after
another. Histogram pixels go to the blocks one per clock, and pixels to
convert go `CONV_LANES` per clock.

**Timing.** A CTRL or RESULT access is acknowledged two clocks after
`OPB_select` rises. A DATA write is acknowledged seven clocks after: three
clocks plus one per byte lane. With `CONV_LANES` = 2, a conversion write is
acknowledged after five clocks. An access that arrives while the
blocks are not ready is held without acknowledge until they are. This happens
during table programming and during the clear after reset. While such an
access waits, `Sl_toutSup` is raised so the bus does not time out.
`Sl_DBus` is zero outside the acknowledge clock. `Sl_errAck` and `Sl_retry`
are never raised, and `OPB_seqAddr` is ignored.

## Parameters

| parameter  | default       | where                                    | meaning                       |
|------------|---------------|------------------------------------------|-------------------------------|
| `PIX_W`    | 8             | `hist_equ_pkg`, all blocks               | bits per pixel, K = 2^PIX_W   |
| `FRAME_W`  | 20            | `hist_equ_pkg`, all blocks               | window side W                 |
| `CNT_W`    | 9             | `hist_equ_pkg` ($clog2(W*W+1))           | histogram counter width       |
| `N_H`, `N_V` | 1, 1        | `opb_hist_equ`, `hist_equ_array`         | grid of blocks                |
| `LANES`    | 1             | `hist_equ_pkg`, all levels               | RAM banks: 2*`LANES` bins read and table entries written per clock (1, 2, 4, ...; a power of two) |
| `CONV_LANES` | 1           | `hist_equ_pkg`, all levels above `hist_calc` | pixels converted per clock (1 or 2) |
| `COORD_W`  | 8             | `hist_equ_array`                         | coordinate width              |
| `C_BASEADDR`, `C_HIGHADDR` | 0xA0000000, 0xA00000FF | `opb_hist_equ`  | bus address window            |

The bus interface packs four pixels per word, so it assumes `PIX_W` = 8. The
blocks below it take any `PIX_W` of 2 or more.

## Module hierarchy

    opb_hist_equ            OPB slave, registers, coordinate generation
     └ hist_equ_array       N_H x N_V grid, window selection per block
        └ hist_equ_block    sequencer: histogram -> read/program -> convert
           ├ hist_calc      histogram RAM, inc/dec pipeline, bypass, 2-bin read/clear
           │  └ dp_bram
           ├ equalization   running sum and scaling to LUT values
           └ lut_mem        LUT RAM with programming and conversion multiplexers
              └ dp_bram
    hist_equ_pkg            widths, window size, pixel operation enum

`dp_bram` is a behavioural dual-port read-first RAM that synthesis tools map
to block RAM. Its contents are not initialised. `hist_calc` clears itself,
and the LUT must be programmed before it is used.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
RTL against values it computes itself and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench             | what it shows                                                                 |
|-----------------------|-------------------------------------------------------------------------------|
| `tb_dp_bram`          | read latency, read-first on a written port, old data on a read/write clash |
| `tb_hist_calc`        | four banks: 32-clock clear after reset, random streams with repeated pixels (bypass) and decrements, eight-bin read with and without clear |
| `tb_equalization`     | two banks: all 256 values of random histograms, restart of the sum, saturation |
| `tb_lut_mem`          | four banks: eight-per-clock programming, two conversion lanes (often in the same bank), one-clock conversion, reprogramming |
| `tb_hist_equ_block`   | three windows: from scratch, differential step, from scratch after a clearing read; one window converted while the next histogram is computed; 131-clock programming |
| `tb_hist_equ_block_lanes4` | the same with four banks (35-clock programming) and two conversion lanes |
| `tb_hist_equ_array`   | 3x2 grid, two conversion lanes: every block's output, pixels taken per block (W^2 full, 2W per step), a differential step overlapped with conversion |
| `tb_opb_hist_equ`     | whole peripheral at default size over the bus: three windows, bus rules, acknowledge latencies, held accesses, partial words |
| `tb_opb_hist_equ_2d`  | the same sequence on a 4x2 grid with two banks and two conversion lanes, every block's results and the pixel counts per update |
| `tb_face_scan`        | a window scanned down an image column by 40 differential steps, then 4 steps right; each window checked |

The test images are generated with `$urandom`: a gradient plus noise, so
that equalisation changes the pixels. To run one with Verilator 5, from the
folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_opb_hist_equ \
        -y rtl -y tb +libext+.sv -Irtl rtl/hist_equ_pkg.sv tb/tb_opb_hist_equ.sv
    ./obj_dir/Vtb_opb_hist_equ

Every testbench runs in well under a second.

## Departures from the paper and limits

* **Second pixel input.** The paper's block diagram shows one data input.
  The block here adds a separate conversion input so that histogram and
  conversion can overlap, as the paper's timing assumes. The bus interface
  does not use the overlap: both kinds of pixel come through one register.
* **In-module parallelism.** Banks (`LANES`) give the paper's faster read
  and program times of 64 and 32 clocks. Whether a synthesis tool packs the
  banks into a single wide block RAM, as the paper's one-RAM figures imply,
  has not been checked. Conversion is at most two pixels per clock, one per
  LUT port, and histogram input is one pixel per clock. Not built: several
  histogram or LUT RAMs per block (four or more conversions per clock), the
  two-unit histogram of the paper's Fig. 2, and distributed-RAM readers. So
  the paper's single-block configurations with up to 200 conversion clocks
  can be set up, but its configurations with more than one RAM of each kind
  per block cannot.
* **Step direction.** The grid's differential step moves every window one
  row down: the grid extends sideways and the windows step down, which needs
  the fewest pixels per step. A single block can also step one column right,
  because it takes any pixel sent to it. Send the 20 pixels of the leaving
  column with the decrement operation and those of the entering column with
  the increment operation, with `diff` = 0. `tb_face_scan` tests four such
  steps.
* **Rounding.** Table values are rounded down. The paper gives the formula
  but no rounding.
* **Bus register map, coordinate generation and held accesses** are this
  design's own. The paper gives only the OPB attachment.
* **Word padding.** The paper counts the cost of whole memory words at the
  ends of rows. Here the partial words carry byte enables, and only the
  enabled pixels cost block clocks. The bus still transfers the whole words.
