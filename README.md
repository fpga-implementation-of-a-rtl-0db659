# CA-CFAR ship detector for SAR images, fed from HBM

Ships on the open sea show up in a SAR (synthetic aperture radar) image as a
few pixels much brighter than the water around them. A cell-averaging CFAR
(constant false alarm rate) detector finds them. For every pixel it estimates
the mean μ and standard deviation σ of a background window around the pixel,
leaving out a guard area next to it. It then flags the pixel when

    x > T = μ + k·σ

On high-resolution products the window is large: up to 299 × 299 pixels,
for images of 25 000 × 40 000 pixels. The work is dominated by moving pixels
into the arithmetic, not by the arithmetic itself.

This RTL is a kernel for an HBM-equipped FPGA accelerator card. It follows the
architecture of *FPGA Implementation of a Scalable SAR Image Processor for CFAR
Object Detection*. It rests on three ideas:

1. **Rows spread over many memory channels.** Image row *y* lives in HBM read
   channel *y* mod 30, so 30 AXI ports of 256 bits deliver data in parallel.
2. **A column-wise window cache.** A row of 300 block-RAM queues holds one image
   row per queue. One read returns a whole column of the window in a single
   clock.
3. **Running sums.** Only the first pixel of a row sums its whole window.
   Every further pixel updates the sums with the few columns that leave or
   enter the background frame.

The result is one bit per pixel, written back over one AXI write channel.

## Files

| file | contents |
|---|---|
| `rtl/cfar_pkg.sv` | widths, configuration record, mask modes, pipeline operations, sequencer states |
| `rtl/cfar_kernel.sv` | top level, including the window sequencer |
| `rtl/ctrl_regs.sv` | AXI4-Lite register file (start, done, configuration) |
| `rtl/hbm_read_channel.sv` | one AXI4 read master per HBM channel; keeps its queues filled |
| `rtl/hbm_bram_router.sv` | sparse wiring: channel *ch* reaches only queues *ch*, *ch*+30, … |
| `rtl/pixel_cache.sv` | the queues plus the zeroing multiplexers that select window rows |
| `rtl/pixel_queue.sv` | one queue: block RAM, 256-bit write port, 16-bit read port |
| `rtl/cfar_pipeline.sv` | running sums, threshold and decision |
| `rtl/mask_writer.sv` | packs result bits into beats and writes them with AXI4 |
| `tb/*.sv` | self-checking testbenches, behavioural HBM models, reference model |

## How image rows reach the cache

This is the part that needs the most care, so here it is in detail.

**Partitioning in HBM.** The host splits the image by rows. Row *y* goes to read
channel *ch* = *y* mod `NCH` as that channel's local row *m* = *y* div `NCH`. The
row sits at byte address `img_base + m·pitch`. Rows are padded to a multiple of
512 bytes (256 pixels), so `pitch = ceil(width/256)·512`. Every channel uses the
same offset `img_base` inside its own address space. A 256-bit beat holds 16
pixels, and pixel *x* sits in bits `16·(x mod 16) +: 16`.

**Row-to-queue rule.** Queue *q* only ever holds rows with *y* mod `NQ` = *q*.
Because `NQ` is a multiple of `NCH`, such a row always comes from channel
*q* mod `NCH`. That is why the router only has to wire channel *ch* to queues
*ch*, *ch*+`NCH`, *ch*+2·`NCH`, … (10 queues per channel at the defaults). A full
30 × 300 crossbar is not needed.

**The window slides down through the queue array.** For target row *r*, the
window covers rows *r*−hh … *r*+hh (hh is the half height). Its top row is in
queue `top_q` = (*r*−hh) mod `NQ`. Row *i* of the window is in queue
(`top_q`+*i*) mod `NQ`. When *r* advances, `top_q` advances too, and the window
wraps past queue `NQ`−1 back to queue 0. The cache works out each queue's row
position *rel* = (*q* − `top_q`) mod `NQ` and applies a per-queue 2:1
multiplexer, pixel or zero. The mask mode of each read picks which rows pass:

| mode | rows passed (rel) | used for |
|---|---|---|
| `MASK_FULL` | 0 … win_h−1 | a window column outside the guard columns |
| `MASK_FRAME` | window rows except hh−gh … hh+gh | a column crossing the guard area |
| `MASK_BAND` | hh−gh … hh+gh only | turning a frame column into a full one, or back |
| `MASK_TARGET` | hh only | the pixel under test |

**Queues as circular buffers.** A queue holds 8192 pixels (512 beats), and rows
are often wider than that. Pixel column *x* is therefore stored at index
*x* mod 8192, and the read address is just the low bits of the column.

Each read channel counts, per queue, the beats it has issued and the beats it
has received (`rx_beats`). Two rules keep reader and writer apart:

- The sequencer reads column *x* only when every queue inside the window has
  received beat *x* div 16.
- The channel never fetches past `lo_beat + 512`. `lo_beat` is the beat holding
  the oldest column the sequencer may still read: (c − hw) div 16 while the
  window is at column c.

Bursts are INCR bursts of up to `BURST` beats. They are shortened at the room
left in the queue and at `BURST`-beat boundaries counted from the row start.
`IMG_BASE` must be 512-byte aligned. Then, with the default `BURST` = 16
(512 bytes), no burst crosses a 4 KiB boundary. A larger `BURST` also needs
rows aligned to `BURST`·32 bytes. A channel takes its queues round robin, with up to `MAX_OUT`
bursts in flight and a single AXI ID.

**Per-row restart.** At every new target row the sequencer first waits until all
read channels are idle. It then pulses `row_go`. Each channel works out which
local row each of its queues must now hold, and which of those rows lie inside
the window ("active"). It latches the row geometry, and restarts every queue at
column 0. The window rows are re-read from HBM for each target row. The
memory traffic therefore grows with the window height, while the pixel rate
stays fixed by the pipeline.

## Walking the window along a row

The sequencer in `cfar_kernel` works through the image in raster order. It
sends one request per clock into the cache and pipeline:

- Rows with fewer than hh rows above or below them, and columns with fewer than
  hw columns to the left or right, have no full window. They go out as "not
  detected" (`OP_ZERO`) without any cache read.
- At the first valid column of a row (c = hw), the window is summed from
  scratch: one read per window column, with `clear` on the first.
  Columns hw−gw … hw+gw use `MASK_FRAME`, all others `MASK_FULL`.
- The pixel under test is read with `MASK_TARGET` (`OP_TARGET`).
- Moving from target c to c+1 takes four column reads:

      - FULL  column c−hw       (leaves the window)
      + BAND  column c−gw       (leaves the guard area: its guard rows now count)
      - BAND  column c+gw+1     (enters the guard area: its guard rows stop counting)
      + FULL  column c+hw+1     (enters the window)

So once a row is running, each pixel costs five clock cycles. This is the
rate the testbenches check. The pipeline is fully stallable: if the result
writer's FIFO is full, `en` drops and every stage, the cache output register
included, holds its value.

## The threshold pipeline

`cfar_pipeline` takes one masked column (NQ pixels) per clock, in six stages:

1. squares; partial sums in groups of 30
2. column sum Σx and column sum of squares Σx²
3. running window sums S and Q (add, subtract, or clear and add); a target
   read captures x, S and Q
4. d = N·x − S, N·Q, S²
5. d², e = N·Q − S² (= N²σ², limited to ≥ 0)
6. detected = d > 0 and d²·2¹⁶ > k²·e

N is the number of background pixels, (2hw+1)(2hh+1) − (2gw+1)(2gh+1). k is an
unsigned 8.8 fixed-point number, so k = 15 is `0x0F00`. The test is exact in
integers: no division, square root or rounding. It matches x > μ + kσ exactly
for the given k. The accumulator widths hold windows of up to 2²⁰ pixels.

## Control and results

`ctrl_regs` is an AXI4-Lite slave with 32-bit registers:

| offset | register | notes |
|---|---|---|
| 0x00 | CTRL | write bit0 = START (ignored while busy); read bit0 BUSY, bit1 DONE, bit2 IDLE; reading clears DONE and `irq` |
| 0x10 | WIDTH | pixels per row, up to 65535 |
| 0x14 | HEIGHT | rows, up to 65535 |
| 0x18 / 0x1C | WIN_HW / WIN_HH | background window half width / height (window = 2h+1) |
| 0x20 / 0x24 | GRD_HW / GRD_HH | guard half width / height |
| 0x28 | K | CFAR constant, 8.8 fixed point |
| 0x30 / 0x34 | IMG_BASE | image offset inside every read channel (low / high), 512-byte aligned |
| 0x38 / 0x3C | MASK_BASE | result address on the write channel (low / high), 32-byte aligned |

The configuration is latched at START. The window must have at most `NQ` rows,
and the guard must be strictly smaller than the window in both directions.
Otherwise the kernel writes an all-zero mask.

Result row *y* starts at `MASK_BASE + y·ceil(width/256)·32`. Bit *i* of beat *b*
is pixel 256·*b*+*i*, and the padding bits are zero. Each beat is written as a
single-beat burst. DONE is raised after the last write response.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NQ` | 300 | queues = largest window height + 1; must be a multiple of `NCH` (a 90-queue build suits windows up to 89 rows) |
| `NCH` | 30 | HBM read channels |
| `DEPTH_PIX` | 8192 | pixels per queue (16 KiB block RAM) |
| `BURST` | 16 | largest AXI read burst, a power of two ≤ 128 |
| `MAX_OUT` | 8 | read bursts in flight per channel, a power of two |

## Throughput

A valid image row costs five clocks per pixel, plus a short refill at the
row start; a border row costs one clock per pixel. The row period does not
depend on the window size, because the 30 read channels fetch the window
rows faster than the pipeline uses them.

`tb_sentinel1_strip` measures this at the default parameters on strips
25 927 pixels wide, the width of a Sentinel-1 IW high-resolution scene:

| window | guard | cycles per row | cycles per pixel | 16 709 rows at 150 MHz | at 275 MHz |
|---|---|---|---|---|---|
| 75 × 75 | 7 × 7 | 129 450 | 4.99 | 14.4 s | 7.9 s |
| 151 × 151 | 11 × 11 | 129 234 | 4.99 | 14.4 s | 7.9 s |

150 MHz is the clock reported for the 300-queue build, and 275 MHz the one
reported for a 90-queue build, which holds windows up to 89 rows. That build
has the same sequencer, so its cycle counts are the same; `tb_cfar_kernel_nq90`
checks its results. The original
hardware measured 14.5 to 14.7 s for windows of 101 to 299 pixels on the
large build, and 7.9 s for windows of 61 and 75 pixels on the small one.
This RTL's timing has not been checked on an FPGA.

Such a scene needs 29 MB per read channel and the mask 55 MB, well within
512 MB per channel. A 25 000 × 40 000 TerraSAR-X StripMap scene fits as well:
67 MB per channel and a 125 MB mask, with windows up to 299 rows. At five
clocks per pixel it takes about 33 s at 150 MHz; the reported bound of 15 s applies
to large windows on the smaller Sentinel-1 scene.

## What is this design's own

These points follow the original design:

- the partitioning by rows over 30 channels
- the sparse channel-to-queue wiring
- 300 queues of 8192 pixels with 256-bit writes and 16-bit reads
- the row mapping with wrap-around
- the zeroing multiplexers
- the running-sum update
- Equation T = μ + kσ
- one result bit per pixel on a dedicated write channel
- the default sizes

The rest was not specified there and was chosen here:

- **Threshold pipeline:** the integer form of the test, the format of k and
  the split into stages.
- **Sequencing:** the mask modes, the five-read schedule per pixel, the
  per-row restart of the queues, and the handling of the image border.
- **Interfaces:** the address layout in HBM, the burst scheduling and the
  register map.
- **Beat packing:** the original description says a 256-bit beat carries
  32 pixels. With 16-bit pixels it carries 16, and this design packs 16.

Not part of this RTL: the HBM stacks and their memory controllers, the
PCIe shell and host driver, the tool-generated interconnect, and the host
library that partitions the image and starts the kernel. The top level brings
out the 30 AXI4 read ports, the AXI4 write port and the AXI4-Lite control port
for them. `rready` is tied high because the queues always accept data. AXI
signals not listed on the ports imply ARSIZE/AWSIZE = 32 bytes, INCR bursts,
ID 0 and all write strobes set.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Compile
the packages first, then the RTL, then the testbench files. For example, the
end-to-end test at reduced size (12 queues, 4 channels, 256-pixel queues) is
built and run like this:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/cfar_pkg.sv tb/cfar_tb_pkg.sv \
      rtl/cfar_kernel.sv rtl/ctrl_regs.sv rtl/hbm_read_channel.sv \
      rtl/hbm_bram_router.sv rtl/pixel_cache.sv rtl/pixel_queue.sv \
      rtl/cfar_pipeline.sv rtl/mask_writer.sv \
      tb/hbm_rd_model.sv tb/hbm_wr_model.sv tb/tb_cfar_kernel.sv \
      --top-module tb_cfar_kernel -o sim && ./obj_dir/sim

| testbench | what it shows |
|---|---|
| `tb_pixel_queue` | asymmetric read/write, output hold, simultaneous write |
| `tb_hbm_bram_router` | each write reaches exactly queue ch + 30·j |
| `tb_pixel_cache` | all four mask modes, windows wrapping around the array |
| `tb_cfar_pipeline` | decisions against a 128-bit model, pixels at the threshold, six-cycle latency under stalls |
| `tb_hbm_read_channel` | right rows in the right queues, no overwrite of live data, bursts within 4 KiB |
| `tb_mask_writer` | bit layout, padding, back-pressure, done after the last response |
| `tb_ctrl_regs` | register map, start pulse, sticky done |
| `tb_cfar_kernel` | whole kernel at reduced size, every result bit against a brute-force reference, read schedule, five-cycle pixel rate, and a count of each mechanism (border and zero rows, full accumulation, updates, cache waits, queue wrap, room-limited reads, window wrap in the array, write stalls, invalid configuration) |
| `tb_cfar_kernel_full` | the same at the default parameters: a 75 × 75 window on a 96 × 330 image (the window goes all the way round the 300 queues), a 21 × 299 window, an 8400-pixel-wide strip that wraps the 8192-pixel queues, and an invalid configuration; about 80 s with Verilator |
| `tb_cfar_kernel_nq90` | the 90-queue build (other parameters at the defaults): 61 × 61, 75 × 75 and 89 × 89 windows wrapping around the 90 queues, a strip wider than a queue, and a 91-row window refused |
| `tb_sentinel1_strip` | the Sentinel-1 workload at the defaults: full-width strips with 75 × 75 and 151 × 151 windows, every bit (75 × 75) or a sample (151 × 151) against the reference, five cycles per pixel, the row period independent of the window, and the projected scene time; about 2 minutes |

The reference model in `tb/cfar_tb_pkg.sv` sums each window directly and
generates the test image from a hash of (seed, row, column), so no data files
are needed.
