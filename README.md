# Stereo vision on a small FPGA: cameras, shared SRAM, convolution and SAD disparity

This design is the image processing part of a small robot controller board
with two cameras, an ARM (PXA255) CPU and a Spartan-3E class FPGA. The FPGA
has a single-port external SRAM, about 1 MB. Both camera streams are written
into that SRAM. Two hardware units then read the frames back:

* a **4x4 convolution unit** that uses only one hardware multiplier;
* a **7x7 SAD stereo disparity unit**. For every left-image pixel it finds the
  best match among 32 horizontal offsets in the right image. It also flags
  how far the result can be trusted.

The CPU starts the units and sets their parameters through memory-mapped
registers. It is the same bus it uses for other chips on the board. At the
full size of 352x288 pixels, the disparity unit produces about 14 to 15 depth
maps per second at a 50 MHz system clock.

The main ideas are these:

1. **One stream protocol.** Every data path is a request/acknowledge stream.
   A simple tree of two-input arbiters shares the memory among many units.
2. **Pseudo dual-port memory.** The SRAM clock is faster than the system
   clock, and reads and writes are batched. Together they make the one-port
   SRAM serve a 50 MHz read bus and a 50 MHz write bus at the same time.
3. **Incremental window sums.** The disparity unit keeps a table of last
   line's window sums, so each new 7x7 window costs only two row sums. This is
   what lets it run in real time with modest logic.

```
  camera 0 -> camera_if -> mem_write_adapter --\
                                               alt_arbiter -> write bus --\
  camera 1 -> camera_if -> mem_write_adapter --/                           \
                                                                        sram_ctrl <-> SRAM chip
  sad reader  (frames 0+1) --\                                             /
                              prio_arbiter -> read bus --------------------/
  conv reader (frame 0)    --/          <- read data routed back by tag
  sad reader  -> sad_disparity -> disparity results (sad_* ports)
  conv reader -> conv2d        -> convolution results (conv_* ports)
  CPU bus -> cpu_bus_if -> control/status registers, coefficients
```

## Streams and arbitration

A stream has a `req` line from the source, an `ack` line from the sink, and
data. A word moves on every rising clock edge where both `req` and `ack` are
high. A source that keeps `req` high can therefore send one word per clock.
A slow sink throttles the source just by holding `ack` low. The types shared
by the streams are defined in `m6_pkg`:

* `pix_t`: a pixel with a start-of-frame bit.
* `pair_t`: a left/right pixel pair.
* `sram_wr_t`: an address/data write.

Two arbiter types build a tree:

* **`alt_arbiter`.** When both inputs keep requesting, it serves them in turn,
  one transfer each. An input that requests alone is served on every clock.
* **`prio_arbiter`.** Input 0 always wins. Input 1 gets through only in cycles
  where input 0 is not requesting.

Both arbiters hold their choice while a granted request waits for `ack`, so
the data does not change under a pending transfer. The output data comes
from a multiplexer, not from shared tri-state lines.

In the top level:

* An `alt_arbiter` joins the two camera write paths. Both cameras run at the
  same rate, so sharing evenly is right.
* A `prio_arbiter` joins the two readers, with the disparity reader on the
  priority input. The convolution unit needs only one pixel per 16 clocks and
  lives well on the gaps.

## The SRAM controller (`sram_ctrl`, `sram_interleave`, `async_fifo`)

This is the hardest part to reason about. The SRAM runs back-to-back cycles
(no bursts): each cycle can start one read or one write to any address.

* A read puts its address on the pins in one cycle. The chip drives the data
  in the next cycle.
* A write needs the address and the data in the same cycle.
* So a write cannot start in the cycle right after a read, because the data
  lines still belong to the chip.
* A switch from reads to writes costs one idle cycle. A switch from writes to
  reads costs nothing.

If reads and writes simply alternated, only 2 accesses would fit in 3 cycles.
To avoid this, the controller keeps separate queues and works in batches of
up to `NBATCH` (12) transfers of one kind. Under full two-way load this gives
2N/(2N+1) of the one-way bandwidth:

| N    | 1     | 4     | 8     | 12    | 16    |
|------|-------|-------|-------|-------|-------|
| rate | 66.7% | 88.9% | 94.1% | 96.0% | 97.0% |

The memory side runs on its own clock, `memclk`, between 50 and 100 MHz. The
processing side runs on `clk` at 50 MHz. Three dual-clock FIFOs connect the
two clock domains:

* a read-request queue of `{tag, address}`;
* a write queue of `{address, data}`;
* a read-return queue of `{tag, data}`.

Each FIFO is `async_fifo`, 16 deep, with Gray-coded pointers and first-word
fall-through. With `memclk` at 80 MHz or more, reads in one direction run at
the full 50 MHz of the bus. A mixed load still keeps both buses busy most of
the time.

How `sram_interleave` decides, each `memclk` cycle:

* **Staying in a direction.** It stays in the current direction while that
  direction has work and fewer than `NBATCH` transfers were done. It also
  stays while the other queue is empty. So a one-way stream is never broken
  up.
* **Read to write.** The switch waits until the last read's data phase is
  over. That wait is the `turn` cycle.
* **Return room.** Read data cannot be held back: the return queue has no
  `ack` on its write side. So a read is started only if the return queue has
  room for it and for every read still in flight. The check uses the return
  queue's write-side fill level, which is pessimistic.
* **Pin timing.** An access chosen in cycle t drives the registered pins
  during t+1. Read data is sampled at the end of t+2.

Returned words carry the tag given with their request. The top level uses
the read arbiter's grant as the tag. In this way each word goes back to the
reader that asked for it. Both readers (`mem_read_adapter`) use credits: a
reader asks for a word only once it has reserved space for that word in its
own output buffer. This is needed because a reader cannot refuse a returning
word either.

The external SRAM is assumed to be 512K words of 18 bits (1 MB). This is
enough for the two camera frame buffers of 101,376 words each:

* camera 0 at word 0;
* camera 1 at word 101,376;
* one 8-bit pixel per 18-bit word.

## CPU interface and register map (`cpu_bus_if`, `m6_fpga_top`)

The CPU is always the bus master. It reaches the FPGA through 20 word-address
lines:

* bits 19:15 select one of 32 device IDs;
* bits 14:0 are a 16-bit word offset inside the device.

**Reads.** The address is sampled on each `clk` edge. The selected device
answers combinationally. The FPGA drives the data pins (`cpu_rdata_oe`) only
while chip select and output enable are low. The fastest CPU read cycle is
about 37 ns. One 20 ns sample plus the output path fits inside it.

**Writes.** A write is taken once the write strobe has been seen on two
consecutive clock samples, using the address and data of the earlier sample.
It is then handed to the devices as a single one-clock pulse. Strobes
therefore need to last at least two clock periods (40 ns).

Register map:

| Device | Offset | Access | Meaning |
|--------|--------|--------|---------|
| 0 | 0 | W | bit 0: start a convolution frame; bit 1: start a disparity frame |
| 0 | 0 | R | bit 0: convolution reader busy; bit 1: disparity reader busy; bits 3:2: camera 1/0 overflow (sticky); bit 4: convolution window sum in progress |
| 0 | 1 | R/W | camera capture enable, bits 1:0 |
| 0 | 2 | R/W | disparity low threshold (reset 128) |
| 0 | 3 | R/W | disparity high threshold (reset 750) |
| 0 | 4 | R/W | best/second-best distance threshold (reset 2) |
| 0 | 5, 6 | R | frames written from camera 0, camera 1 |
| 0 | 7 | R | disparity frames completed |
| 1 | 0-15 | R/W | convolution coefficients, row-major, signed 16 bit (sign-extended to 18) |

All other devices read as zero. The reset thresholds are the values that
worked best on a standard test stereo pair. The map itself is this design's
own.

## Camera receiver (`camera_if`, `mem_write_adapter`)

Each camera is the master of its own clock. In 8-bit mode its pixel clock
runs at up to about 18 MHz, too fast to sample reliably with the 50 MHz
system clock. So PCLK is used as a clock:

* On each rising PCLK edge where HSYNC is high, the Y byte is stored into
  one of two holding registers, used in turn, and a toggle flag flips.
* The flag crosses to `clk` through a two-flop synchroniser. Every change of
  the flag reads the older holding register.
* VSYNC is a slow pulse, so it is sampled directly. Its rising edge marks the
  next pixel as start of frame.
* A 4-deep FIFO absorbs short stalls.
* A pixel that finds the FIFO full is dropped and sets a sticky overflow
  flag.

`mem_write_adapter` turns the pixel stream into SRAM writes at the frame base
plus a pixel index. It restarts the index at 0 on start of frame, so a lost
pixel cannot shift the next frame. Pixels past the frame size are dropped.
It also counts the complete frames written.

## Convolution unit (`conv2d`)

The unit computes, for every position where the 4x4 window lies inside the
image:

    out(x0, y0) = sum over i, j in 0..3 of coef[4j + i] * p(x0 + i, y0 + j)

This is correlation order: the window is not flipped.

Multipliers are scarce, so there is one 18x18 multiply-accumulate. It takes
16 clocks per output pixel.

* Three line buffers hold the previous lines.
* When a pixel arrives, its column of the window is read from the line
  buffers, and the window registers shift by one column.
* The 16 multiply-accumulate cycles then run. The next pixel is accepted in
  the last of those cycles.
* Pixels that complete no window pass at one per clock.

A full 352x288 frame gives 349 x 285 results and takes about 1.6 M clocks,
about 32 ms at 50 MHz. Several units could work side by side on different
image areas. The top level has one.

## Disparity unit (`sad_disparity`)

### What it computes

The images are assumed rectified, so matches lie on the same image line. For
each left-image pixel (x, y) and each disparity v = 0..31, the cost is the
7x7 sum of absolute differences between:

* the window around (x, y) in the left image, and
* the window around (x+v, y) in the right image.

Pixels outside the image count as zero. The result for the pixel is:

* the v with the smallest sum, where a tie goes to the smaller v;
* that smallest sum.

Two confidence flags come with each result:

* **`thr_ok`**: the smallest sum lies within [low, high]. A sum that is too
  high means no real match. A sum that is too low usually means a flat,
  textureless area where noise decided the match.
* **`sbd_ok`**: the best and the second-best disparity are at most `sbd_thr`
  apart. When two good matches are far apart, the choice was probably
  arbitrary.

Both flags cost only a pair of comparators and a second best/second-index
register per column.

### How: the lookup table recurrence

Let the row sum be

    Rw_y(x, v) = sum over i = -3..3 of |L(x+i, y) - R(x+v+i, y)|

The 7x7 window total then follows from the total one line up:

    Total_y(x, v) = Total_(y-1)(x, v) - Rw_(y-4)(x, v) + Rw_(y+3)(x, v)

So a table of `IMG_W x NDISP` totals (352 x 32 entries of 14 bits) turns
every new window into two row sums, however large the window is. The row
sums themselves come from shift registers:

* Along a line, the last 7 absolute differences are kept in a shift register.
* An adder tree of depth 3 sums them.
* Two such chains run side by side: one for the line entering the window and
  one for the line leaving it.

### Schedule and timing

* The last 8 lines of both images are kept on chip.
* When a line has arrived, one **pass** runs. A pass is 32 sweeps, one per
  disparity, of `IMG_W + 6` clock steps each.
* One table entry is updated per clock.
* The last sweep of a pass also yields the results of the line three rows up,
  one per clock.
* Three extra passes after the last line, with zero lines entering, finish
  the bottom rows.
* Loading a line and processing it do not overlap.

A frame therefore takes:

    IMG_H*IMG_W + (IMG_H + 3) * NDISP * (IMG_W + 6) clocks
    = 101,376 + 291 * 32 * 358 = 3,435,072 clocks at 352x288

That is 68.7 ms, or 14.6 frames/s at 50 MHz. In the full-size simulation,
the memory is shared with both cameras and the convolution, and a frame took
70.7 ms (14.1 frames/s).

### Interface

* Input: `pair_t` pixel pairs in raster order, with `sof` on the first pair.
* The thresholds must be held stable during a frame.
* Output: results in raster order, with `out_disp`, `out_sad`, `out_thr_ok`
  and `out_sbd_ok`, on a `req`/`ack` stream.
* `frame_done` pulses after a frame's last result.

## Clocks and reset

There are two clock domains:

* `clk`: the 50 MHz system clock.
* `memclk`: the memory clock, normally 1.5 to 2 times `clk`. It comes from a
  clock manager outside this RTL.

Only `async_fifo` and the camera receivers cross between clocks. The
external reset `rst_n` is active low. It is asserted asynchronously and
released through a two-flop synchroniser in each domain.

## Parameters of the top level

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `IMG_W`, `IMG_H` | 352, 288 | image size (camera resolution) |
| `CONV_WIN` | 4 | convolution window side |
| `SAD_WIN` | 7 | disparity window side (odd) |
| `NDISP` | 32 | disparities searched |
| `NBATCH` | 12 | SRAM batch length |
| `QDEPTH` | 16 | depth of the SRAM clock-crossing queues |

## Simulating

Everything simulates with Verilator 5. The simulator is two-state, so the
design resets or initialises all state it reads. For example, the top-level
end-to-end test runs with:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/m6_pkg.sv tb/tb_m6_fpga_top.sv \
  --top-module tb_m6_fpga_top -Mdir obj_top
obj_top/Vtb_m6_fpga_top +verilator+rand+reset+2
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it shows |
|-----------|---------------|
| `tb_alt_arbiter`, `tb_prio_arbiter` | grant order under random requests and stalls, data integrity, held grants |
| `tb_async_fifo` | order and completeness across unrelated clocks, full/empty behaviour |
| `tb_sram_interleave` | batch length 12, no write right after a read, no bus conflicts, 479 accesses in 500 cycles under two-way load (96%), one-way streams at one per cycle, read-return room |
| `tb_sram_ctrl` | the whole controller across clocks, tags, 300 writes or reads in 300 cycles |
| `tb_cpu_bus_if` | random CPU reads/writes at bus timing, exactly one write pulse per write |
| `tb_camera_if` | pixels, frame starts, overflow flag, using the camera model |
| `tb_mem_write_adapter`, `tb_mem_read_adapter` | addressing, frame restart, pairing, credits under stalls |
| `tb_conv2d` | every output against a direct sum, 16-clock output spacing |
| `tb_sad_disparity` | every result and flag against a brute-force search, exact frame clock count |
| `tb_sad_tsukuba_size` | the disparity unit at 384x288 with 20 disparities and thresholds 128/750, second-best distance 2, on a synthetic scene with true disparities 0-15: every result against a direct search, frame clock count (47.6 ms at 50 MHz), share of results at the true disparity |
| `tb_m6_fpga_top` | 16x10 images end to end; counts arbiter alternation and priority, SRAM turnarounds and full batches, camera overflow, both values of each flag, output stalls |
| `tb_m6_fpga_top_full` | the top at its default size: every convolution and disparity result checked, frame rate at least 14 frames/s (about 15 s of run time) |

`tb/sram_model.sv` and `tb/camera_model.sv` are behavioural models of the
SRAM chip and of a camera. They are not part of the design.

## Where this design makes its own choices

Some parts are not defined by the underlying method, and are this design's
own choices:

* the register map;
* the frame buffer layout;
* the batching rule and the return-room check in the SRAM controller;
* the credit-based readers;
* the two-sample CPU write filter;
* the ping-pong camera holding registers;
* zero padding at image borders;
* the tie-break to the smaller disparity;
* the output order of the convolution;
* non-overlapped line loading in the disparity unit.

Several things are left out, for different reasons.

**No function given:**

* a Bayer colour filter stage: only gray (Y) pixels are used;
* a CPU-to-SRAM DMA controller;
* image rectification.

**Outside the FPGA logic:**

* camera setup over I2C;
* the clock manager that makes `memclk`.

**Not built: alternatives to the chosen method:**

* left-right consistency checking;
* multiple-window matching;
* sub-pixel refinement.

**Left to the consumer of the results:** filling in rejected pixels, for example by blanking them or copying a neighbour's disparity. The unit only flags each result; which fix suits depends on the application.
