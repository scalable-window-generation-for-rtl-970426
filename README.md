# Scalable sliding-window generator and 2D convolution datapath

Sliding-window kernels such as 2D convolution need, for every output pixel, the
`wr x wc` neighbourhood ("window") around it. On an FPGA with plenty of memory
bandwidth, the way to use that bandwidth is to replicate the compute pipeline P
times and feed it P windows per cycle. The window generator is what usually stops
this from scaling. Older designs realign rows and pixels with wide multiplexers,
and they stall their window registers through one enable with a huge fanout. Both
get slower as P grows.

This RTL implements a window generator built so that no path between registers
depends on P:

* a **variable-read FIFO** (`vrf`) that lets the consumer take the last, partial
  group of pixels of a row. The image never needs padding to a multiple of P
  columns. Output alignment uses a pipelined barrel shifter with one 2:1 mux
  per stage.
* a **window buffer** (`window_buffer`, `row_fifo`). It has one row FIFO per
  window row, in fixed order: the top FIFO always holds the top row of the
  windows, so no row multiplexer is needed. Rows climb from FIFO to FIFO.
* a **window coalescer** (`window_coalescer`). This is a shift register of window
  columns with no enable at all: the controller only starts a row of windows
  once every column of it is buffered.

Around it sits a complete 2D convolution accelerator (`conv2d_top`). It has MMIO
registers for the kernel and the sizes, P replicated convolution pipelines, and a
large output FIFO. The pipelines are either fixed point (one multiplier per
kernel element, then a balanced adder tree) or single-precision floating point
(a chain of multiply-add units), chosen when the design is built. Instead of stalling the pipelines, the FIFO stops the window
generator when it is almost full.

Default configuration (package `wg_pkg`): P = 64 pipelines, windows up to 3x3,
images up to 2048x2048, 8-bit pixels, 16-bit signed kernel coefficients. Window
size and image size are chosen at run time, up to those maxima.

## Data flow

```
 image words (P pixels)      P pixels, 1..P valid        MAX_WR x P columns
 ─────────────────────► vrf ─────────────────────► window_buffer ─────────► window_coalescer
                                                    (MAX_WR row FIFOs)           │ P windows
 MMIO ─► mmio_regs ─ kernel, sizes, start                                        ▼
                                        ┌──── P x conv_pipeline (multipliers + adder tree)
                                        ▼
                              sync_fifo (output FIFO) ── almost_full ──► stall (window_buffer)
                                        │
                                        ▼ result words (P results + mask, row, column)
```

The image arrives as `ceil(ir*ic/P)` words of P pixels in raster order. Rows are
not padded, so a row can start anywhere inside a word. For each image row, the
window buffer reads `ceil(ic/P)` groups from the VRF. Each group is P pixels,
except the last, which is `ic mod P` pixels (when that is nonzero). A row
therefore always begins a fresh FIFO word, and the unused slots of its last word
are zero.

## Variable-read FIFO (`vrf`)

The storage is 2P registers. A write always fills the upper half (registers
P..2P-1). An output index points at the oldest unread pixel. A read of A pixels
advances the index by A. When the index reaches P or more while the upper half
holds data, the buffer shifts left by P and the index drops by P. That frees the
upper half for the next write. Unread data therefore always ends at register P-1
or 2P-1. `count` is that end position minus the index.

The P outputs are `buffer[index .. index+P-1]`. They pass through a log2(P)-stage
barrel shifter. Stage 1 shifts by P/2 under the top index bit and the last stage
shifts by 1 under bit 0. There are registers after every stage, and the index
bits and the "which outputs are valid" mask travel along. A read of A pixels
comes out log2(P) cycles later with outputs 0..A-1 marked valid. One read per
cycle is sustained.

Two details to know when reusing it:

* After a write into an empty VRF, the data becomes readable one cycle later.
  It was written into the upper half and must first be shifted down.
* `wr_ready` depends combinationally on the read in the same cycle, because a
  read can free the upper half.

## Window buffer and its controller (`window_buffer`)

The buffer holds MAX_WR row FIFOs, each `MAX_COLS/P` words of P pixels deep.
FIFO 0 is the top window row and FIFO MAX_WR-1 the bottom row. Let
`N = ceil(ic/P)`. The controller follows three rules:

1. **Fill.** New words enter the bottom FIFO. When a FIFO already holds N words
   (a whole row) and receives another word, its oldest word is read and written
   into the FIFO above. Rows thus rise until every FIFO holds one row.
2. **Output.** When every FIFO holds N words and `stall` is low, all FIFOs are
   read together for N consecutive cycles. Those N words go to the coalescer.
   Each word also moves into the FIFO above, and the top FIFO's word is dropped.
   At the end, every FIFO again holds the next row, except the bottom one.
3. **Overlap.** During output, new pixels keep entering the bottom FIFO. With a
   steady input stream, the bottom FIFO is full again just as a row of windows
   ends. The next row then follows with no gap, and the throughput is P windows
   per cycle while a row streams.

Because a row of windows, once started, is never interrupted, the coalescer
needs no enable. `stall` is checked only before a row starts.

**Smaller windows.** A `wr x wc` window (wr ≤ MAX_WR, wc ≤ MAX_WC) is produced by
sliding the full MAX_WR x MAX_WC window over the image. Its top-left `wr x wc`
part is the requested window. Near the bottom edge, the full window reaches below
the image, so after the last image row the controller pushes MAX_WR - wr rows of
zeros. It produces `ir - wr + 1` rows of windows, then clears the FIFOs and pulses
`done`. The cost is only the time to fill the extra rows. The elements outside the
requested window are don't-care. The convolution ignores them because the unused
kernel coefficients are zero (they reset to zero).

The VRF answers a read after log2(P) cycles, so returning pixels land in a small
skid FIFO (log2(P)+4 words). The controller issues a read only when that FIFO has
room for it.

## Window coalescer (`window_coalescer`)

The coalescer has `C = ceil((MAX_WC + P - 1)/P) * P` register columns, each
MAX_WR pixels tall. It shifts by P every cycle and loads the new P columns at
its far end. Window k is columns `k .. k+MAX_WC-1`. With S = C/P, the word that
entered S-1 cycles earlier is in columns 0..P-1, so window k starts at pixel k
of that word. The word index and the row number travel beside the data through S
registers. Window k of word j is marked valid when `j*P + k ≤ ic - wc`.
For P = 64 and 3x3 windows, C = 128 and S = 2.

## Convolution pipeline (`conv_pipeline`) and the top (`conv2d_top`)

Each pipeline runs in stages:

1. An input register rank for the window and the coefficients, with no logic in
   front of it. Synthesis can duplicate these registers, which fan out to many
   pipelines because overlapping windows share pixels.
2. TAPS = MAX_WR·MAX_WC signed multipliers (unsigned pixel times signed
   coefficient), registered.
3. A balanced adder tree with a register after each level.

The latency is `2 + ceil(log2(TAPS))` cycles: 6 for 3x3. The result is a signed
number `DATA_W + COEF_W + 1 + ceil(log2(TAPS))` bits wide (29 bits by default),
so it cannot overflow.

The output FIFO (`sync_fifo`, 128 words by default) receives one word per cycle
in which any pipeline produces a result. A word holds the P results, a valid
mask, and the row and column of result slot 0. Its almost-full level is the depth
minus (a row of windows + coalescer depth + pipeline depth + 4). Everything still
in flight after `stall` rises therefore fits.

### Register map (`mmio_regs`, 32-bit data, word addresses)

| addr | name | meaning |
|---|---|---|
| 0x00 | CTRL | write bit 0 = 1 to start (ignored while busy) |
| 0x01 | STATUS | bit 0 done (sticky, cleared by start), bit 1 busy |
| 0x02 | ROWS | image rows ir |
| 0x03 | COLS | image columns ic |
| 0x04 | WIN_ROWS | window rows wr, 1..MAX_WR |
| 0x05 | WIN_COLS | window columns wc, 1..MAX_WC |
| 0x10 + r·MAX_WC + c | COEF | kernel coefficient (r, c), signed |

The reads return data one cycle after `mmio_rd_en`. STATUS.done is set once the
last result of the image is in the output FIFO.

## Floating-point pipeline (`fp_conv_pipeline`, `fp32_pkg`, `delay_line`)

Set `FLOAT = 1` on `conv2d_top` (with `DATA_W = COEF_W = 32`) to build with
IEEE single-precision pixels, coefficients and results instead. This pipeline
is shaped for FPGA DSP blocks that each do a floating-point multiply and add
and have dedicated routing to their neighbour. It uses no adder tree. Unit t
computes `sum[t] = pix[t]*coef[t] + sum[t-1]`, so the adds form a chain as
long as the kernel.

```
 win[0] ──────────────────► (×coef0) ─► sum0 ─┐
 win[1] ─ delay 1 ────────► (×coef1) ─► + ────► sum1 ─┐
 win[2] ─ delay 2 ────────► (×coef2) ─────────► + ────► sum2 ... ─► result
```

Each unit has a product register and a sum register, so the running sum
reaches unit t one cycle after unit t-1. Pixel t is therefore delayed t
cycles. The delays grow linearly: 80 cycles for the last tap of a 9x9 kernel.
`delay_line` builds a delay of fewer than `RAM_MIN` (16) cycles from registers
and a longer one as a circular buffer in RAM. Latency is `TAPS + 2` cycles:
11 for 3x3.

The arithmetic (`fp32_pkg`) rounds to nearest with ties to even, after the
multiply and again after the add. It flushes subnormals to zero and turns
overflow into infinity. It gives infinity and NaN inputs no special treatment.
The coefficients pass the input register rank but do not travel down the chain.
So write them only while no image is running (STATUS.busy low). Windows cut
short by a smaller kernel still go through all MAX_WR·MAX_WC units, with zero
coefficients, so the order of the adds is always the same.

## Timing and throughput

* Steady state: P windows (P results) per cycle while a row streams, and one row
  of windows every `ceil(ic/P)` cycles when input keeps up. At default
  parameters, a 2048x2048 image with a 3x3 kernel takes 65,609 cycles from start
  to done, against 2048·2048/64 = 65,536 input cycles.
* Latency to the first window: about `MAX_WR · ceil(ic/P)` cycles of filling,
  plus log2(P) (VRF), S (coalescer) and the pipeline depth.
* In the window generator, no path between registers grows with P except the
  VRF count logic, which is one adder/subtractor of log2(2P+1) bits. Every
  other path is a 2:1 mux (VRF), a FIFO pointer or a small counter. In the
  fixed-point pipelines, each stage is one multiplier or one adder. In the
  floating-point pipelines, each stage is a whole single-precision multiply or
  add. Give them more register stages for a high clock rate.

## What is and is not here

Built: everything from the image stream to the result stream, with
fixed-point (default) or single-precision pipelines.

Departures and choices to be aware of:

* The memory side is not included: the DMA engine with reordering, address
  translation and width conversion, the host's coherent memory interface, and
  page tables. The top exposes valid/ready streams where they connect. The
  testbenches drive those streams directly.
* The floating-point pipeline is plain RTL, not a vendor DSP primitive. Its
  latencies (one cycle each for the multiply and the add), the register/RAM
  threshold and the number-range rules are choices of this implementation.
* Pipelines that apply several filters to each window (CNN use) are not included.
  Each pipeline applies one kernel.
* Row FIFOs are arrays read without a clock edge. On an FPGA you would want a
  block RAM with a registered read, which adds a cycle to the fill and output
  rules.
* The VRF's empty state parks the index at P, not 0, with the upper half
  marked empty. The first write is shifted down before it can be read. This
  costs one cycle per image and keeps a single rule for the shift.
* Everything runs on one clock. A memory interface on a faster clock
  would need clock-crossing FIFOs at the stream ports.
* P must be a power of two, at least 2. MAX_COLS should be a multiple of P.
* The skid FIFO after the VRF, the zero rows below the image, stopping only
  between rows of windows, the register map and the output word format are
  choices of this implementation.

## Files

`rtl/`: `wg_pkg` (defaults and helper functions), `vrf`, `row_fifo`,
`window_buffer`, `window_coalescer`, `window_gen` (VRF + buffer + coalescer),
`conv_pipeline`, `fp32_pkg`, `delay_line`, `fp_conv_pipeline`, `sync_fifo`,
`mmio_regs`, `conv2d_top`.

`tb/`: one self-checking testbench per module (`<module>_tb`, with `sync_fifo_tb`
for the output FIFO). `fp_conv_pipeline_tb` also checks the floating-point
arithmetic against a bit-exact reference on 40,000 random operand pairs.
There are also three larger testbenches:

* `conv2d_top_full_tb` runs the default configuration on a 2048x2048 image and
  checks all 4,186,116 results and the cycle count.
* `conv2d_workloads_tb` builds for 9x9 windows with P = 16 and runs 3x3, 5x5,
  7x7 and 9x9 kernels on 256x256 images.
* `conv2d_top_fp_tb` is the end-to-end test of the `FLOAT = 1` build.
* `conv2d_workloads_fp_tb` runs the same four kernel sizes in single precision.
  It builds with P = 8 and windows up to 9x9, and checks every result bit for
  bit against a reference that applies the same roundings in the same order.

`conv2d_top_tb` runs small images that between them cover partial VRF reads,
zero rows, output back-pressure with almost-full stalls, back-to-back rows and
input gaps. It counts each of these mechanisms.

Every testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert --top-module conv2d_top_tb \
    rtl/wg_pkg.sv rtl/fp32_pkg.sv rtl/*.sv tb/conv2d_top_tb.sv
./obj_dir/Vconv2d_top_tb
```

(list the two packages first so they are read before their users; Verilator
ignores the repeated files, or use `-y rtl` and name only the packages and the
testbench). The
full-size test builds in well under a minute and runs in about ten seconds.
Change the configuration through the parameters of `conv2d_top`
(`P`, `MAX_WR`, `MAX_WC`, `MAX_COLS`, `MAX_ROWS`, `DATA_W`, `COEF_W`,
`OFIFO_DEPTH`, `FLOAT`).
