# Foveal image processor for visual see-and-avoid

A small unmanned aircraft that must avoid other aircraft without radar has to find them in
camera images: an intruder with a 10 m wingspan seen from 2 km covers only a few pixels, and it
has to be found in every frame, in real time, on an FPGA with a power budget of a few watts.
This RTL implements the image-processing part of such a system. It uses a two-step, *foveal*
scheme:

1. **Full-frame preprocessing.** Every camera pixel is compared with the average of its
   neighbourhood. Pixels clearly darker than their surroundings become white in a binary
   image; these are the candidate points. The binary image is cut into 32x32 tiles, and the
   number of candidate pixels in each non-empty tile is reported to the control processor.
   The frame and its binary image are stored in DRAM.
2. **Foveal processing.** The control processor picks 128x128 windows (*foveas*) around the
   candidate tiles. A DMA engine copies them from DRAM into on-chip memories. Two small
   processors then work on them one instruction at a time: a **grayscale processor** that
   computes one pixel per clock, and a **binary processor** that computes one 128-pixel row per
   clock. Status flags (all white, all black, changed) let the control processor decide cheaply
   what to do next, for example when to stop an iterated operation.

The control processor itself (a soft CPU), the DDR3 controller, the interrupt controller and the
clock generators are not part of this RTL. Their connections are ports of the top module,
`saa_top`.

## Data flow and clock domains

```
camera ──► cam_if ──► adaptive_threshold ──► tile_counter ──► async FIFO ──► tile reports
  (cam_clk)  │                 │                                             (sys_clk)
             └─gray pixels─────┴─binary pixels──► frame_writer ─FIFO─► DRAM write port
                                                                             (sys_clk)
DRAM read port ◄── fovea_dma ──► system ports of the fovea memories ◄── cpu_* ports
                                   │                         │
                        gray_proc (4 x 128x128x8)   bin_proc (4 blocks x 4 x 128x128x1)
                               (proc_clk)                 (proc_clk)
instructions ──► 4-deep async FIFO ──► processor ──► done pulse ──► *_done, *_flags (sys_clk)
```

There are three clock domains, each with its own synchronised reset (`rst_sync`):

| domain    | runs                                                         | intended rate |
|-----------|--------------------------------------------------------------|---------------|
| `cam_clk` | camera interface, threshold, tile counter, frame packing     | 165 MHz pixel clock |
| `sys_clk` | tile reports, DRAM ports, DMA, instructions, `cpu_*` ports   | 66 MHz        |
| `proc_clk`| grayscale and binary processors                              | 150 MHz       |

Data crosses domains only through Gray-pointer async FIFOs (`async_fifo`). Completion pulses
cross through toggle synchronisers (`pulse_sync`). Each fovea memory is a true dual-port RAM:
port A is clocked by `proc_clk` and port B by `sys_clk`. Two slow signals pass through plain
two-flop synchronisers: the configuration (`cfg_thr`, `cfg_win`) and the processor flags.
This is safe only under two rules. Change the configuration between frames; it is sampled on
the first pixel of each frame. Read the flags at least one `sys_clk` after the `*_done` pulse.

## Full-frame preprocessor

**`cam_if`** registers the camera's frame-valid, line-valid and 8-bit pixel signals. It tags
each pixel with its column and row, and flags the first pixel of each frame.

**`adaptive_threshold`** makes the binary image. With k = 3, 5 or 7 (`cfg_win` = 0, 1, 2) and
a global offset T (`cfg_thr`):

    white  <=>  sum of the k x k window  >  k*k * (pixel + T)

In words, a pixel is white when it is more than T below its local average. The comparison is
written without a divider. The local average makes the threshold follow the background, so a
bright cloud does not hide a dark object next to it. The control processor can raise T from
frame to frame when there are too many candidates (for example along cloud edges) and lower it
when there are none.

Six line buffers hold the six previous rows, packed into one W-entry RAM 48 bits wide. Each
incoming pixel therefore yields a 7-pixel column. The column sum of the k centre rows goes into
a 7-entry shift register, and the window sum adds its k centre entries. Whatever k is, the
window centre is always 3 rows and 3 columns behind the newest pixel, so the latency is fixed at
3·W+3 pixels. Pixels within k/2 of the frame border are output black.

After the last pixel of a frame, the unit runs on by itself for 3·W+3 clocks to push out the
last rows. Every frame therefore yields exactly W·H binary pixels in raster order. **The camera's
vertical blanking must be at least 3·W+3 pixel clocks**, which is 5,763 clocks at W = 1920, a
few lines.

**`tile_counter`** counts white pixels per 32x32 tile. A 6-bit counter counts each 32-pixel row
segment and adds it into a per-tile-column accumulator. On the last row of a band of tiles, each
non-empty tile is reported as `{tx, ty, count}`, with coordinates in tile units. The last band
of a 1080-row frame is 24 rows high and closes on row 1079. Reports reach `sys_clk` through a
64-deep FIFO. If that FIFO overflows, `tile_overflow` is set and stays set.

## Frame store (`frame_writer`)

Frames go into a ring of `NFRAMES` slots in DRAM. Addresses are in 32-bit words.

| region        | word address                             | packing                               |
|---------------|------------------------------------------|---------------------------------------|
| gray image    | `slot*FRAME_STRIDE + (y*W + x)/4`        | 4 pixels/word, leftmost in bits 7:0   |
| binary image  | `slot*FRAME_STRIDE + W*H/4 + (y*W + x)/32` | 32 pixels/word, leftmost in bit 0   |

Frame n goes to slot n mod `NFRAMES`, and the first frame after reset goes to slot 0. Binary
words are held for one clock in a holding register until a clock with no gray word. Gray words
come at most every fourth pixel and binary words every 32nd, so the register never overruns. The
last binary word of a frame carries an end marker. Once that word has been written,
`frame_count` increments and `frame_done` pulses, and only then is the frame complete in DRAM.

## Fovea DMA (`fovea_dma`)

The `dma_cmd_t` command gives a frame slot, a corner `(tx*32, ty*32)` on the 32-pixel grid, a
kind (gray or binary) and a destination:

* gray fovea: 128 rows x 32 words go to gray memory `dst[1:0]`, word `row*32 + i`;
* binary fovea: 128 rows x 4 words go to binary block `dst[3:2]`, slot `dst[1:0]`.

The grid constraint makes every fovea row start on a DRAM word, so no shifting is needed. The
DMA issues word reads as fast as `mr_ready` allows. Data must come back in order on
`rd_valid`/`rd_data`, with no back-pressure. With a memory that never stalls, a gray fovea takes
about 4,100 `sys_clk` and a binary one about 520. While the DMA runs it owns the system ports of
all fovea memories, and `cpu_*` writes are ignored.

## Grayscale processor (`gray_proc`, `gray_pe`, `gray_fovea_mem`)

An instruction (`gray_instr_t`) names two source memories, one target memory and one processing
element:

| `op`        | result                                   |
|-------------|------------------------------------------|
| `G_ADD`     | min(a + b, 255)                          |
| `G_SUB`     | max(a − b, 0)                            |
| `G_MUL`     | (a·b) >> 8                               |
| `G_ABS`     | \|a − b\|                                |
| `G_THRESH`  | a > b ? 255 : 0 (b can be a constant image or a threshold map) |
| `G_AVG`     | ⌊3x3 sum / 9⌋, computed exactly as (sum·7282) >> 16 |
| `G_DIFFUSE` | ([1 2 1; 2 4 2; 1 2 1] · window) >> 4, one diffusion step |
| `G_EDGE_H/V/D1/D2` | \|Sobel response\| >> 2 for horizontal, vertical, 45° and 135° edges |

Here a is source 1 (its 3x3 neighbourhood for the window operations) and b is the pixel of
source 2 at the same position. Both sources are read in raster order at one pixel per clock. A
259-entry shift register per source (two fovea rows plus three pixels) holds the 3x3
neighbourhood of the pixel 129 positions behind the newest. Outside the fovea the edge pixel is
repeated. All PEs see the window, and the instruction selects one. The result is written to the
target memory.

An operation takes **16,516 `proc_clk`** from instruction to `done`: 16,384 pixels plus the
129-pixel look-ahead and 3 clocks of pipeline. That is 110 µs at 150 MHz. When an operation ends:

* `white`: every result pixel is 255;
* `black`: every result pixel is 0;
* `change`: some result pixel differs from source 1. An iterated operation whose output is fed
  back as its input has reached steady state when this flag is 0.

The target must differ from both sources, because each memory has only one processor-side port.
An assertion checks this. Source 1 and source 2 may be the same memory.

## Binary processor (`bin_proc`, `bin_pe_array`, `bin_fovea_mem`)

Binary foveas are stored one row per 128-bit word. A memory block (`bin_fovea_mem`, four
18-kbit BRAMs side by side on the original FPGA) holds four foveas as 512 rows. Four blocks hold
16 foveas, and an image index is `{block[1:0], slot[1:0]}`. The processor-side port reads or
writes a whole row per clock. The system-side port is 32 bits wide, with address
`{slot, row, word}`, and word 0 holds columns 0..31.

The processor reads one row of each source per clock. Two row registers hold rows r−1 and r,
the RAM output supplies row r+1, and 128 one-bit processors (`bin_pe_array`) compute row r:

| `op`       | result |
|------------|--------|
| `B_ERODE`  | 1 where the whole 3x3 neighbourhood is 1 (outside the fovea counts as 1) |
| `B_DILATE` | 1 where any pixel of the 3x3 neighbourhood is 1 (outside counts as 0) |
| `B_SPR`    | single pixel removal: a 1 with no 1 among its 8 neighbours becomes 0 |
| `B_RECON`  | one reconstruction step: dilate(source 1) AND source 2 |
| `B_AND`, `B_OR`, `B_XOR` | of the two sources |

One operation takes **130 `proc_clk`**, or 0.867 µs at 150 MHz: 128 rows plus one row of
look-ahead and one write clock. Row 0 is already read in the clock in which the instruction is
offered. The same three flags as in the grayscale processor are
produced.

Reconstruction is driven by the control processor. It issues `B_RECON marker→mask→T`, then
`B_RECON T→mask→marker`, and so on, until `change` is 0; the marker then holds every 8-connected
component of the mask that touches the seed. The target block must differ from the source
blocks. For the two-source operations (`RECON`, `AND`, `OR`, `XOR`), the two sources must be in
different blocks or be the same image. An assertion checks both rules.

## Control processor interface

All control ports of `saa_top` are in `sys_clk`:

* `tile_valid/tile_ready/tile`: candidate tiles, in the order the tiles close;
* `frame_count`, `frame_done`: frames complete in DRAM. Frame n is in slot n mod `NFRAMES`;
* `dma_cmd_valid/dma_cmd/dma_cmd_ready/dma_done`: fovea transfers;
* `gray_instr_*`, `bin_instr_*`: instruction queues, four deep each. `*_instr_ready` is low
  while the queue is full. `*_done` pulses once per finished instruction, and `*_flags` hold
  the flags of the last instruction;
* `cpu_g_*`, `cpu_b_*`: direct access to the fovea memories (select, word address, write,
  data). Read data comes one clock after the address.

A typical frame goes like this. Wait for `frame_done` and collect the tile reports. Adjust
`cfg_thr` if there are too many or too few candidates. For each candidate, issue a DMA with
`tx = tile_x − 1`, `ty = tile_y − 1` (clamped to the frame), then grayscale and binary
instructions. Read back the results or just the flags.

## Parameters (`saa_top`)

| parameter      | default   | meaning |
|----------------|-----------|---------|
| `W`, `H`       | 1920, 1080 | frame size. `W` must be a multiple of 32, and `W`, `H` ≥ 128 |
| `NFRAMES`      | 4         | DRAM frame slots |
| `AW`           | 25        | DRAM word-address width (128 MB) |
| `FRAME_STRIDE` | 2^20      | words per slot, must be ≥ 1.125·W·H/4 |
| `NGRAY`        | 4         | grayscale fovea memories |
| `NBBLK`        | 4         | binary memory blocks (4 foveas each) |

The instruction and DMA formats fix `NGRAY` and `NBBLK` at 4 or fewer (2-bit selects).

## Performance against the intended use

* **One HD stream (1920x1080 at 50 Hz)**: 103.7 Mpixel/s against one pixel per clock at
  165 MHz. DRAM traffic is 1.125 byte/pixel, 117 MB/s, well under the 1.6 GB/s of a 400 MHz
  DDR3.
* **Foveas per frame**: with three 16.6 Hz HD streams a frame period is 20.1 ms. Take 4
  grayscale operations (4 × 110 µs) per fovea, with the ~50 binary operations (43 µs) running
  in parallel on the binary unit. That gives about 45 foveas per frame. One such frame has
  room for 182 grayscale operations (16,516 clocks each) or 23,170 binary operations (130 clocks
  each).
* **A five-camera 4650x1280 panorama** is not handled by one instance. 4650 is not a multiple of
  32, so each camera would need its own preprocessing path.

## Where this RTL departs from, or goes beyond, the system it models

* The preprocessing algorithm as designed uses a 7x7 zero-sum contrast filter and a threshold
  raised by local edge density. This RTL implements the simpler hardware form: a
  local-average threshold with a 3x3/5x5/7x7 window plus a global offset. The edge-density term
  is left to the global threshold and to the fovea processing.
* The arithmetic of every PE, the padding rules, all port protocols, the DRAM layout, the
  instruction and command formats, and the instruction queues are this design's own choices.
* The PE set is fixed at synthesis time. Swapping PEs by partial reconfiguration is not
  modelled.
* Only non-empty tiles are reported.
* One camera stream per instance.
* The 7x7 threshold window keeps six full lines (11.5 KB at W=1920), a dual-clock 64-entry FIFO
  sits in front of the DRAM, and the tile counter keeps one accumulator per tile column. The
  reference system's preprocessor reports two block RAMs, so its line storage must be organised
  differently.
* The grayscale processor has a single arithmetic unit. Four units would give four times the
  throughput; this is not built.

## Verification

Each block has a self-checking testbench in `tb/` that compares against values computed in the
testbench itself. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `cam_if_tb` | pixel values, coordinates, start/end of frame, one-clock latency |
| `adaptive_threshold_tb` | every output pixel for 3x3, 5x5 and 7x7 windows, with input gaps; output count and latency |
| `tile_counter_tb` | tile reports, including empty, full (1024) and short-band tiles |
| `async_fifo_tb` | ordering across unrelated clocks, full at DEPTH, drain |
| `frame_writer_tb` | every DRAM word of three frames in two slots under a stalling DRAM |
| `fovea_dma_tb` | gray and binary foveas at edge corners, stalling DRAM, 4096-clock rate |
| `gray_fovea_mem_tb`, `bin_fovea_mem_tb` | both ports, byte/word order, read latency |
| `gray_pe_tb`, `bin_pe_array_tb` | every operation against reference arithmetic |
| `gray_proc_tb` | all 11 operations on whole foveas, flags, 16,516-clock timing |
| `bin_proc_tb` | all operations, flags, 130-clock timing, iterated reconstruction vs. flood fill |
| `fovea_workload_tb` | one fovea's workload (4 gray + 50 binary operations, both units in parallel at 150 MHz) finishes within 446 us, the share of one 45-fovea frame; final images checked |
| `saa_top_tb` | end-to-end at 224x160: three frames (one per window size), DRAM contents, tile reports, DMA, gray and binary processing, and counts of every mechanism |
| `saa_top_full_tb` | the same flow with every parameter at its default: one 1920x1080 frame (about 40 s in Verilator) |

The two top-level testbenches share `tb/saa_top_tb_body.svh`, and contain a DRAM model and a
model of the control processor. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module saa_top_tb rtl/saa_pkg.sv tb/saa_top_tb.sv
./obj_dir/Vsaa_top_tb
```

Replace `saa_top_tb` with any other testbench name. The fovea memories are written from two
clock domains, as true dual-port RAMs are. Verilator warns about this (`MULTIDRIVEN`), and the
warning is expected.
