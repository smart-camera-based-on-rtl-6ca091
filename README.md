# A coprocessor for a CMOS smart camera

A CMOS image sensor can be read like a memory: any window, at any
subsampling, as often as needed, with any integration time. This design puts
a hardware coprocessor (COP) right behind such a sensor and in front of a
host processor, so that the camera only sends the host what the application
needs. The COP grabs images in whatever mode the host asks for, runs a chain of
image-processing tasks on them in its own memory, and streams the results,
or the raw image, to the host.

The coprocessor has two parts, each on its own clock:

* **Acquisition.** A sequencer drives the sensor: integration, then readout of
  a window with X/Y subsampling. It supports single, multi-exposure, tracking
  (the window moves between exposures) and line-scan modes. Pixels are packed
  four to a 32-bit word and sent over a link to the processing part.
* **Processing.** The host writes a list of up to eight task descriptors and
  starts it. A sequencer runs the tasks one after another over a shared main
  memory of 8 MB. A task is either a data movement or a processing pass, and
  each processing pass is a memory-to-memory operation:
  * data movements: sensor → memory, host → memory, memory → host;
  * processing passes: median filter, local adaptive (Niblack) binarization,
    binary shape search, 90° transposition, high pass filter, and dilation
    with subsampling.

  Any pass can also copy its results to the host while it writes them.

The design is written to handle a bar-code reading application. A letter on a
conveyor is grabbed in line-scan mode (180 × 1712 pixels). The COP then
transposes it, filters out the background and dilates and subsamples it by
16, and only the small result goes to the host for labelling and decoding.

## Clocks and data flow

```
 host bus (pci_clk)            processing (clk)                    acquisition (acq_clk)
 ───────────────────   ┌──────────────────────────────────────┐   ─────────────────────
 register bus ──► bus_bridge ─cfg─► command_controller          │
                 │  data FIFO ───► control_mem ◄── link FIFO ◄── acq_data_interface
                 │  result FIFO ◄─┘   │  ▲   main memory (8 MB)      ▲
                 │  status ◄──────────┤  │                          acq_data_control ◄─► sensor
                                      ▼  │
                       processing_controller ─► processing_unit (6 modules, one memory port)
```

* **Three clock domains.** The three clocks are the host bus, the processing
  part and the acquisition part.
  * Data crosses between domains only through dual-clock FIFOs (`cdc_fifo`)
    with Gray-coded pointers. There are three of them: host → processing data,
    processing → host results, and acquisition → processing pixels. A fourth,
    small one carries configuration writes.
  * The start of an acquisition crosses as a toggle through three flip-flops.
    The acquisition command itself is not synchronized: it must not be
    rewritten while an acquisition runs.
  * `busy` and `done` reach the status register through two flip-flops.
* **Main memory (`control_mem`, `sram_mem`).** The memory is single ported:
  one 32-bit access per cycle, with a read result one cycle later. It has one
  user at a time, either the transfer engine (ACQUIRE, LOAD, STORE) or the
  processing module of the current task. Each module keeps its own line cache
  (rows of the image), so it reads every source word once and writes every
  result word once.
* **Back-pressure.** Back-pressure works the same way at every step.
  * Every stream uses valid/ready.
  * The result FIFO says "ready" while it still has at least four free
    entries. A producer with one word in flight therefore never overruns it.
  * When the host reads too slowly, the result FIFO fills. Memory grants then
    stop, which stalls the active module or transfer.
  * The link FIFO's almost-full flag pauses the sensor readout in the same
    way.
* **Result broadcast (`copy_out`).** `copy_out` is one bit of the task
  descriptor. On ACQUIRE it sends the sensor words to the host as they are
  stored. On a processing task it sends every word the module writes. That
  word is then granted only while the result FIFO can take it.

## Data formats

* **Grey images:** 8-bit pixels, 4 per word, with the leftmost pixel in bits
  7:0. Rows follow each other, `width/4` words per row.
* **Binary images:** 1 bit per pixel, 32 per word, with the leftmost pixel in
  bit 0.
* **Addresses:** word addresses, 21 bits wide.

## Host interface

The host sees a word-addressed register bus. A write is `host_wr` with an
address and data, and is held while `host_wait` is high. A read is `host_rd`,
and its data comes back on `host_rdata` with `host_rvalid` one cycle later.

| address | access | contents |
|---|---|---|
| 0x00 | W | bit 0 = start the task chain (ignored while busy) |
| 0x01 | R | bits 31:16 = words waiting in the result FIFO, bit 2 = result FIFO empty, bit 1 = done (chain finished since last start), bit 0 = busy |
| 0x08 | W | acquisition: x0 [11:0], y0 [27:16] |
| 0x09 | W | acquisition: width [11:0], height [27:16] |
| 0x0A | W | acquisition: sub_x [3:0], sub_y [7:4] (keep 1 of n+1), mode [9:8] (0 window, 1 multi-exposure, 2 tracking, 3 line scan) |
| 0x0B | W | acquisition: integration time [15:0], delay between exposures [31:16] (acquisition clock cycles) |
| 0x0C | W | acquisition: exposures or lines [7:0], tracking step dx [15:8], dy [23:16] (signed) |
| 0x20..0x2A | W | high pass filter coefficients 0..10, signed, bits 15:0 |
| 0x40 + 8t + 0 | W | task t: opcode [3:0], mode [7:4], copy_out [8] |
| 0x40 + 8t + 1 / 2 | W | task t: source / destination word address |
| 0x40 + 8t + 3 | W | task t: width [11:0], height [27:16] |
| 0x40 + 8t + 4 | W | task t: parameter |
| 0xFF | W / R | write: one data word for LOAD; read: pop one result word (0 if empty) |

The opcodes are listed below. The chain stops at the first END or after
eight tasks.

| op | name | what it does | mode / parameter |
|---|---|---|---|
| 0 | END | end of chain | |
| 1 | ACQUIRE | starts the sensor, stores `param` words at dst | copy_out sends the raw image to the host |
| 2 | LOAD | `param` words from the host to dst | |
| 3 | STORE | `param` words from src to the host | |
| 4 | MEDIAN | 1×3, 1×5 or 3×3 median | mode 0, 1, 2 |
| 5 | NIBLACK | local adaptive binarization | mode bit 0: 16×16 (else 8×8); param[15:0]: variance floor |
| 6 | SHAPE | XNOR correlation of a binary shape over a binary window | param: shape address; result: score map at dst, best on `best_*` |
| 7 | TRANSPOSE | 90° transposition | |
| 8 | HPF | 11-tap row filter, 4 pixels per cycle | param[4:0]: right shift of the sum |
| 9 | DILSUB | row dilation (max of 32) + 1-of-4 subsampling in x and y | |

An ACQUIRE task starts the sensor. It then waits until `param` words have
been stored, so `param` must equal the number of words the acquisition
command produces. For a window that is `ceil(w·h/4)` words per exposure.

## The processing modules

Every module has the same interface:
* `start` pulses with a descriptor `cfg`;
* the module masters the memory bus through a `mem_if` port;
* `done` pulses once its last result word is written.

The request/grant bus is the same for every module. A request is held until
`gnt` is seen, and read data returns in order one cycle after the grant.

* **median_filter.** A 4-row cache holds the rows around the current one. For
  each output word, four sorting networks (3, 5 or 9 inputs) compute four
  medians in one cycle. Pixels outside the image repeat the nearest edge
  pixel. A 128×128 image takes 8,322 cycles in every mode, about half a cycle
  per pixel.
* **niblack_binarize + niblack_stats.** Each pixel is compared with a
  threshold taken from its 8×8 or 16×16 neighbourhood:
  * threshold = mean − 0.1875·standard deviation;
  * a pixel is 1 (dark) when it is below the threshold;
  * the whole neighbourhood is 0 when its variance is under a given floor.

  The test is done in sixteenths (`16·P < 16·mean − 3·std`), so no fractions
  are needed.
  * `niblack_binarize` keeps a 16-row cache and feeds the neighbourhood of
    each pixel, 4 pixels per cycle, to `niblack_stats`.
  * `niblack_stats` is a pipeline of per-lane sums of X and X², then N·ΣX² −
    (ΣX)², then the shifts that divide by N and N², then an integer square
    root.
  * Cost: S²/4 cycles per pixel (16 for 8×8, 64 for 16×16).

  Results are packed 32 per word, so the width must be a multiple of 32. The
  window is clamped inside the image at the borders.
* **shape_search.** The M×M binary shape (M = 32 by default) is compared with
  every position (i, j) of a binary window of up to 128×128 pixels.
  * The score is the number of matching pixels: for each row, a popcount of
    XNOR between the shape row and the window row shifted by i.
  * Eight correlators work on eight neighbouring offsets, and each takes one
    shape row per cycle.
  * The score map is written at dst, (W − M + 1) words per row. The best score
    and its position stay on `best_score`, `best_i` and `best_j`.
  * Cost: (H−M+1) · (ceil((W−M+1)/8) · M + (W−M+1)) cycles after the loads: M cycles per group of eight offsets, then one write per score.
* **transpose4.** Reads four words from four consecutive rows (a 4×4 block),
  transposes them in four registers and writes four words to the mirrored
  place. It takes 8 cycles per block (the memory is busy every cycle), 0.5 cycle per pixel. Width and height must be multiples of 4.
* **highpass_filter.** An 11-tap FIR filter along the rows, run on 4 pixels at
  once: 44 multipliers.
  * Coefficients are signed 16-bit and programmable.
  * The sum is shifted right by `param[4:0]` and saturated to 0..255.
  * Edge pixels are repeated.
  * One word is produced per cycle: a 1712 × 180 image takes 154,262 cycles.
* **dilate_subsample.** Takes the maximum of the 32 pixels x−16..x+15 of a
  row, for x = 0, 4, 8…, on rows 0, 4, 8… The result is a 16× smaller image,
  with ceil(W/16) words per row.

## Acquisition part

* `acq_data_control` drives a random-access sensor:
  * `sen_expose` is high during integration;
  * then one pixel is read per cycle with `sen_rd` and a row/column address;
  * the sensor answers one cycle later.

  The modes:
  * **window:** one exposure;
  * **multi-exposure:** n exposures with a programmable delay between them;
  * **tracking:** like multi-exposure, but the window moves by (dx, dy) after
    each exposure;
  * **line scan:** the same row is read n times, which builds an image of n
    lines from a matrix sensor.

  Reads pause while the link FIFO is almost full.
* `acq_data_interface` packs the pixels four per word. It flushes a partial
  last word two cycles after the sequencer's `done`.

## How closely this follows the source design

What is taken from the source design:
* the split into acquisition and processing parts;
* the command controller, processing controller, processing unit and main
  memory;
* the memory-to-memory modules that share one memory bus, each with its own
  cache;
* the chaining of tasks and the broadcast of results to the host;
* the FIFOs between clock domains;
* the acquisition modes;
* the algorithms and their main numbers: median kernels, the Niblack formula
  with 0.1875, 8×8/16×16 neighbourhoods and 4 pixels per cycle, XNOR shape
  correlation with 8 detection blocks, transposition with 4 registers, an
  11-tap high pass filter on 4 lanes, dilation over 32 neighbours, 1-of-4
  subsampling, and 8 MB of memory.

What is this design's own:
* the register map, opcodes and descriptor layout;
* the handshakes;
* the sensor port;
* edge handling;
* coefficient width, shift and saturation of the filter;
* the binary word format;
* the cache sizes.

Known departures and limits:

* **Niblack throughput.** This design recomputes every neighbourhood from
  scratch. It is about 9–10 times slower per pixel than the reference figures,
  which are roughly 1.8 (8×8) and 6.2 (16×16) cycles per pixel at 25 MHz with
  4 pixels per cycle. Sharing sums between neighbouring pixels would close the
  gap, but how the original does this is not known.
* **Accumulator widths.** The Niblack lane accumulators are one bit wider than
  the 21/13-bit widths of the reference pipeline, so a full-scale 16×16
  neighbourhood cannot overflow.
* **Shape size.** The shape size is fixed per build by `SHAPE_M`, 32 by
  default. The 16×16 and 64×64 shapes need a rebuild with that parameter; the shape-search testbench exercises all three sizes.
* **Parts outside this design:**
  * the PCI core: the register bus stands in its place;
  * the serial transceiver link between the two FPGAs: here a dual-clock FIFO;
  * the acquisition-side SDRAM;
  * the sensor itself: a behavioural model exists for simulation only;
  * the host processor and its software stages, blob labelling and bar-code
    decoding.
* **Main memory model.** `sram_mem` is a synchronous single-port array that
  stands for external ZBT SRAM. It does not model the ZBT's extra pipeline
  stage.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against a
reference computed in the testbench, with random stalls on the memory bus,
and checks cycle counts where a rate is known. Each one prints
`TB_RESULT checks=N failures=M`. Helper models:
* `tb_mem_slave`: memory with random grant stalls;
* `ibis4_sensor_model`: a random-access sensor with a known scene function and
  address checking.

`tb_cop_top` runs the whole coprocessor at its default parameters, with the
three clocks at 100 / 33 / 40 MHz. It drives four chains through the host bus, and the host checks every word
it reads against values computed from the sensor model's scene:
* a windowed, X-subsampled acquisition copied to the host while it is stored,
  then a 3×3 median with its results broadcast, then a read-back from memory;
* the bar-code chain: a line-scan acquisition, then transposition, high pass
  filter, and dilation with subsampling;
* multi-exposure and tracking acquisitions;
* host data loaded into memory, then a shape search, then Niblack
  binarization.

The host reads slowly, so the result FIFO fills and both the chain and the
sensor readout stall. The testbench counts every opcode, every acquisition
mode, every broadcast path, result-FIFO back-pressure and the sensor stall. It
fails if any of them never happened. Host write waits are only reported.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_cop_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/cop_pkg.sv tb/tb_cop_top.sv -o sim
./obj_dir/sim
```

Replace `tb_cop_top` with any other testbench name, for example
`tb_highpass_filter`. The whole top simulates in a few seconds. The module
testbenches shrink `MAX_W` and the shape size where that keeps runs short.
The top's own test keeps every default.
