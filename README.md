# MLSoC dual stream processor in SystemVerilog

This is synthesizable RTL for the dual stream processor (DSP) of a machine
learning SoC for multimedia content analysis. The core idea: image filtering and
feature-vector learning both stream large amounts of data. So the design puts
two stream processors next to a wide, banked on-chip memory and joins them with
a private 256-bit bus. Data move between the processors and the memory without
using the system bus.

- The **image stream processor (ISP)** applies a 16x16-pixel window operation
  at every pixel position. It reads only 16 new pixels per cycle, presents all
  256 window pixels to its processing elements, and outputs one pixel per cycle.
  It has two processors: a linear one (convolution, mean, variance) and an
  order one (median, dilation, erosion, any rank over any mask).
- The **feature stream processor (FSP)** handles machine learning on vectors.
  It does K-nearest-neighbour ranking with a self-sorting array of 128 entries.
  It also does K-means clustering, with a number of vectors per cycle that
  adapts to the dimension: 16 one-dimensional vectors, down to one
  16-dimensional vector, per cycle.
- The **high-bandwidth dual memory (HBDM)** holds the data. It has two memories
  of 16 byte-wide banks with 2048 entries each, 64 KB in total.

The RTL follows the published MLSoC architecture: 90 nm, 300 MHz, 1.3 TOPS
peak. The block structure, sizes, rates and latencies below come from that
design. Details the publication does not give were chosen for this RTL, and are
marked as such in each file's header and in "Departures and gaps" below.

## Block map

```
 host port (DSP side of the LMB-AHB interface)
        |
   dsp_ctrl  (control unit + 64 x 128-bit instruction memory, COPY engine)
        |  owner[0], owner[1]
   lmb  (256-bit local media bus = 2 x 128-bit, one owner per memory)
    |            |               |
   isp          fsp             hbdm (memory 0, memory 1; 16 banks x 2048 B each)
   |- isp_input_if  (slice addressing, 16 pixels / cycle)
   |- pixel_stream_mem (16x16 window)       fsp
   |- kernel_stream_mem (16x16 kernel)      |- knn_proc (supervised)  -- knn_sorter (128 PEs)
   |- linear_proc  -- adder_tree, pipe_div  |- kmeans_proc (unsupervised, bandwidth adaptive)
   |- order_proc
```

`mlsoc_dsp` is the top. The RISC, the AHB buses, the DMA controller, the DDR
controller and the video input are outside it. The host port stands for them:
it writes programs, reads and writes the HBDM while the DSP is idle, and starts
programs.

## The HBDM and the slice layout

This is the key to the ISP's bandwidth. Every bank has its **own address
input** (`mem_req_t.addr[16]`). An image of width W is stored in **slices of
16 rows**:

- image row `y` is stored in bank `y mod 16`;
- pixel `(x, y)` is at address `base + (y div 16) * W + x` in that bank.

A 16x16 window with top row `y` covers rows `y .. y+15`, which are always 16
different banks. The window may straddle two slices. So one column of the
window is read in a single cycle, with a different address in each bank:

```
row_b  = y + ((b - y) mod 16)          -- the window row stored in bank b
addr_b = base + (row_b div 16) * W + x
```

The returned bytes are rotated by `y mod 16` so that element `r` is window row
`r` (`isp_input_if`). A line buffer is not needed. With equal addresses in all
banks, the same memory is a plain 128-bit word memory. Feature vectors, kernels,
centroids, results and the host port use it that way. In this layout the host
writes slice `s`, column `x` of an image as one word at address `s*W + x`.

The two memories are independent. An ISP or FSP pass reads one memory and
writes the other. The control unit's COPY moves one word per cycle, so a whole
memory (2048 words) takes 2048 cycles plus 6 cycles of overhead.

## Image stream processor

### Window streaming
For each output row, the ISP reads columns `x = 0 .. W-1`. It shifts each
column into `pixel_stream_mem`, where column 15 is the newest. A kernel of size
`k` (1..16) sits in window rows `0..k-1` and columns `16-k..15`. A window is
valid once `x >= k-1`. A pass gives `(W-k+1) x (H-k+1)` outputs, one per cycle
in steady state. It takes `W x (H-k+1)` cycles plus the 40-cycle latency. Rows
below the image that the last windows touch are read, but the kernel masks them
out. The output interface writes output `n` to byte `n mod 16` of word
`a1 + n/16` in the destination memory. The FSP can read this layout directly as
16 one-dimensional vectors per word.

The arbiter enables only the processor that the instruction uses. The other
processor's pipeline registers are frozen.

### Linear processor (`linear_proc`), latency 40
| level | hardware | here |
|---|---|---|
| 1 | two 16x16 PE arrays | `p*k` (signed coefficient) and `p*p` on the mask; masked `p` and the member count pass through |
| 2 | tree ALUs | four 256-input `adder_tree`s with 8 registered layers: sum(p*k), sum(p^2), sum(p), n |
| 3 | dedicated engines | variance engine `n*sum(p^2) - sum(p)^2`, `n^2`; `pipe_div` divides one pair per cycle (2 quotient bits per stage, 16 stages) |
| 4 | ALU | sign, optional absolute value, `+ offset`, clamp to 0..255 |

Operations (`linop_e`):

- `LIN_CONV`: `sum(p*k)/divisor + offset`. Use it for Gaussian, low-pass,
  Laplacian, sharpening, the real part of a Gabor kernel, or any 16x16 kernel.
- `LIN_ABS`: the absolute value of the same, for edge detectors.
- `LIN_MEAN`: `sum(p)/n`.
- `LIN_VAR`: `(n*sum(p^2) - sum(p)^2)/n^2`.

All divisions truncate. A delay line pads the 27-cycle core to exactly 40
cycles. The original design's correlation coefficient engine and face detection
engine are **not** built, because their function is not published.

### Order processor (`order_proc`), latency 40
The rank is found bit by bit, starting with the MSB, in 8 bit-level PE stages.
At bit `b`:

1. 256 bit logics and a 9-layer adder count the member pixels that have bit `b`
   set.
2. A comparator tests `count >= rank`. The result is output bit `b`.
3. Each member pixel whose bit `b` differs from the result has its lower bits
   forced to its own bit `b`. A pixel that lost on the high side stays counted,
   and one that lost on the low side never counts again. So `rank` never needs
   adjusting.

Rank 1 is the maximum (dilation). Rank = member count is the minimum (erosion).
`(count+1)/2` is the median. The kernel's non-zero entries form the mask, so
any window shape works. After the 8 stages, the first pixel that matched every
bit is selected. A 16-stage pipelined multiplexer then fetches that pixel; each
stage is a 16-to-1 selector for one window row. A delay line pads the 25-cycle
core to 40 cycles.

## Feature stream processor

### K-NN (`knn_proc`, `knn_sorter`)
A vector of `16*F` dimensions (F = 1..8) is stored as F consecutive words. One
word is processed per cycle: 16 lanes compute `|x-q|`, or `(x-q)^2` when
`euclid` is set. An adder tree sums the lanes, and the sum is accumulated over
the folds. The rate is 1, 1/2, 1/4 or 1/8 vectors per cycle for 16, 32, 64 or
128 dimensions. Distances are squared Euclidean; no square root is taken.

At the last fold, the distance and the vector index enter `knn_sorter`. That is
128 PEs, each with a comparator against the broadcast input. A PE whose left
neighbour's comparator fired takes the neighbour's entry. The PE where the
comparators start to fire takes the new entry. The others hold. The array
therefore always holds the 128 smallest distances in ascending order; equal
distances keep their arrival order. The results are ready as soon as the last
vector has arrived. The first `R` results are written two per word: bytes 0-3
hold the distance, bytes 4-7 the index, and bytes 8-15 the next result.

### Bandwidth-adaptive K-means (`kmeans_proc`)
In mode `sub = log2 D` (D = 1, 2, 4, 8, 16; the published modes A to E), a
word holds `16/D` vectors. Each cycle processes one word against 16 centroids:

- E-M set: 16 lanes x 16 centroids of `|x-c|` or `(x-c)^2`, where lane `l`
  uses centroid component `l mod D`;
- M-S set: a 4-layer adder tree per centroid. The mode selects the layer whose
  sums span D lanes.
- labeling engine: for each vector, the nearest of the first KN centroids.
  Ties go to the lowest index.
- summation updating engine: per centroid, component sums and a member count.

After each of the first ITERS passes, every centroid becomes sum/count, one
centroid per cycle. This truncates, and a centroid with no members keeps its
value. A final pass writes one label byte per vector, in the linear layout.
Run time: 17 cycles to load the centroids, then `(ITERS+1) x (words+1)` cycles
for the passes, plus `ITERS x 16` cycles for the updates.

## Control unit and instruction format

`dsp_ctrl` runs one instruction at a time: fetch, decode, then either do the
work itself (COPY) or start the ISP or FSP and wait for its `done`. While a
processor runs, it owns the memories `src` and `dst` on the LMB. While the
DSP is idle, the control unit owns both memories and the host uses them.

`instr_t` (128 bits, `mlsoc_pkg.sv`):

| field | bits | use |
|---|---|---|
| `op` | 4 | `NOP HALT COPY KLOAD LINEAR ORDER KNN KMEANS` |
| `src`, `dst` | 1+1 | memory read / written |
| `sub` | 3 | `linop_e` (LINEAR), `log2 D` (KMEANS), `F-1` (KNN) |
| `euclid` | 1 | squared Euclidean instead of Manhattan |
| `a0` | 11 | source: image base, kernel, query, centroids, copy source |
| `a1` | 11 | ISP output base, copy destination, first training/feature word |
| `a2` | 11 | K-NN results / K-means labels |
| `width`, `height`, `ksize` | 9+9+5 | image size, kernel size |
| `rank` | 9 | rank (ORDER), results to write (KNN), clusters (KMEANS) |
| `divisor`, `offset` | 16+9 | LINEAR ALU constants |
| `count` | 16 | words (COPY, KMEANS), vectors (KNN) |
| `iters` | 6 | K-means iterations |

The host port (`host_*`) writes instructions and does linear HBDM word
accesses. Read data appears one cycle after the request. `start`/`start_pc`
runs a program. `done` pulses at HALT, and `cycles` gives the program's
length.

## Example: image segmentation
`tb_mlsoc_dsp` runs the segmentation flow of the original design at the default
size:

1. load a 160x120 image in slice layout;
2. `KLOAD` a 5x5 mask;
3. `ORDER` with rank 13 (5x5 median), memory 0 to memory 1;
4. `KMEANS` on the 18,096 filtered pixels as 1-D vectors: 4 clusters, 32
   iterations, labels back to memory 0;
5. `KNN` over the same words as 16-D vectors.

Steps 3 to 5 take 57,641 cycles, which is 0.19 ms at 300 MHz. The original
design reports under 0.5 ms for its example. The test also runs a 5x5 mean
filter and a full 2048-word COPY (2054 cycles).

## Rates at the default parameters
| operation | built rate | published |
|---|---|---|
| any window op, k = 3..16 | 1 output/cycle, 40-cycle latency | 1 pixel/cycle, 40-cycle latency |
| K-means D = 1/2/4/8/16 | 16/8/4/2/1 vectors/cycle | same |
| K-NN 16/32/64/128-D | 1/0.5/0.25/0.125 vectors/cycle | same |
| memory-to-memory copy | 2048 words in 2048 cycles + 6 | 2048 cycles |

A 160x120 frame with a 16x16 window takes 16,800 + 40 cycles here, which is
about 17,800 frames/s at 300 MHz. The published frame rates are lower, at about
10,300 frames/s; they likely include system overhead that is not modelled
here. An HDTV frame does not fit in the HBDM. It has to be fed in pieces by the
host and DMA, which are outside this RTL; the width field is also limited to
511.

## Departures and gaps
- Not built, because only their names are published: the linear processor's
  correlation coefficient engine, its face detection engine, and the "local
  memory" boxes of both ISP processors.
- Outside the DSP and not modelled: the RISC and caches, both AMBA AHBs and
  the bridge, the DMA controller, the DDR controller and interface, video input
  and system/debug controllers. The host port replaces the LMB-AHB interface.
- This design's own choices:
  - the instruction set and encoding;
  - the ownership-based LMB;
  - all memory layouts except the image slice layout;
  - the kernel placement and valid-window-only borders;
  - squared Euclidean distances;
  - truncating divisions and 8-bit clamping;
  - the K-means label output and the centroid update rule;
  - tie rules.
- The original chip lets all four processors run at once for its peak rating.
  This control unit runs one instruction, and so one processor, at a time.
- The linear processor's second PE array is taken to compute `p*p` for the
  variance. The order processor's bit rule is a standard bit-serial rank
  algorithm that fits the published structure: 8 stages, 256 bit logics, a
  9-layer adder and a comparator per stage.
- The HBDM banks are plain arrays, not SRAM macros. Array contents are not
  reset.

## Files
- `rtl/mlsoc_pkg.sv`: sizes, `mem_req_t`, `instr_t`, opcodes.
- `rtl/mlsoc_dsp.sv`: the top. Also `dsp_ctrl`, `lmb`, `hbdm`, `isp`,
  `isp_input_if`, `pixel_stream_mem`, `kernel_stream_mem`, `linear_proc`,
  `order_proc`, `fsp`, `knn_proc`, `knn_sorter`, `kmeans_proc`, plus the
  helpers `adder_tree` and `pipe_div`.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each ends with
  `TB_RESULT checks=N failures=M`. `tb_mlsoc_dsp` is the end-to-end test at
  full size.

## Simulating
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mlsoc_dsp \
    rtl/mlsoc_pkg.sv $(ls rtl/*.sv | grep -v mlsoc_pkg) tb/tb_mlsoc_dsp.sv
./obj_dir/Vtb_mlsoc_dsp
```

Swap in any other `tb_*` as the top module. Every testbench checks outputs
against a reference model written in the testbench, and checks cycle counts
where a rate or latency is specified. Each stops itself with a watchdog. The
full-size end-to-end test runs in under a minute. Lint with
`verilator --lint-only -Wall` and the same file list.
