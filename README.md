# HOG + SVM pedestrian-detection co-processor

This is a hardware accelerator that decides whether a grey-level image window contains a
pedestrian. It follows the classic Dalal–Triggs method:

- A Histogram of Oriented Gradients (HOG) turns the window into a feature vector.
- A linear Support Vector Machine (SVM) scores that vector against a trained weight vector.
- The sign of the score is the answer.

The RTL implements the hardware of the HARVA design ("Hardware Accelerated Real-Time Video
Anonymizer", a master's thesis). There, a CPU crops detection windows out of video frames and
hands them to two co-processors: a HOG component and an SVM component.

Two design ideas run through it:

- **Host-managed local memories.** Neither component reaches main memory on its own. Each one
  owns a small data cache that the host fills. When an engine needs data that is not loaded,
  it raises a *cache-miss* bit and waits. The host loads the next piece and clears the bit.
- **Small, configurable arithmetic.** Each stage is a simple unit with a small state machine.
  The expensive stages can be replicated ("cores") to trade area for speed.

Everything is synchronous to one clock with a synchronous active-low reset. The code is plain
SystemVerilog-2017 and synthesizable.

```
            host port (HOG)                               host port (SVM)
                  |                                              |
  +---------------v-------------------------------+   +----------v-----------------------------+
  | hog                                           |   | svm                                    |
  |  hog_data_cache: HOG_CTRL, IMG_DIM, pixel RAM |   |  svm_data_cache: SVM_CTRL, QUANTIZE,   |
  |        |                                      |   |   BIAS, FEATVEC_SIZE, RESULT, SCORE,   |
  |  hog_fetch  (tiles -> padded word columns,    |   |   coefficient RAM                      |
  |        |     HSYNC/VSYNC, refill requests)    |   |        |                               |
  |  conv2d     Gx, Gy, 4 pixels per word         |   |  control FSM RESET/NOP/FETCH/CLASSIFY  |
  |  grad_stage mag_calc(+isqrt) | bin_assign     | ->|  fv_fifo -> quant -> lin_comb          |
  |  hist_creat 36-bin block histogram            |   |                 label, score           |
  |  hist_norm  L1 normalisation                  |   +----------------------------------------+
  +-----------------------------------------------+
```

## What is computed

For a W×H window (W and H multiples of 8; the standard window is 64×128):

1. **Gradients.** For every pixel, Gx = P(x+1,y) − P(x−1,y) and Gy = P(x,y+1) − P(x,y−1).
   Pixels outside the window take the value of the nearest edge pixel.
2. **Magnitude.** mag = ⌊√((Gx² + Gy²)·2¹⁶)⌋, a 17-bit number with 8 fraction bits.
3. **Orientation bin.** The unsigned orientation (0–180°) goes into one of nine 20° bins.
   No angle is ever computed:
   - Bin k ∈ 0..3 is the first k with |Gy|·256 < T[k+1]·|Gx|; otherwise the bin is 4.
   - T = {0, 93, 215, 443, 1452} is 256·tan(20°·k), rounded.
   - If Gx and Gy are both non-zero with opposite signs, the bin becomes 8 − k (the mirror bin).
   - One comparison pair therefore tests a bin and its mirror in the same cycle.
4. **Blocks.** Blocks are 16×16 pixels and start every 8 pixels, in raster order, so there are
   (W/8)·(H/8) of them: 128 for 64×128.
   - A block is four 8×8 cells. Cell = 2·(row ≥ 8) + (column ≥ 8).
   - Each pixel adds its magnitude to histogram value cell·9 + bin (24-bit sums, no
     interpolation).
5. **L1 normalisation.** s = Σv + min(v). R = ⌊2⁴⁰ / s⌋.
   - out = min(65535, (v·R) >> 24), a 16-bit fraction.
   - The minimum plays the role of the ε that keeps the denominator non-zero. An all-zero
     block gives all-zero outputs.
6. **SVM.** Coefficients are stored quantised as int8 q.
   - Each is decompressed as w = q·step, where QUANTIZE holds step as a 16-bit fraction.
   - The SVM forms Σ w·x in a 64-bit accumulator.
   - At the last value of the window it adds BIAS·2¹⁶, where BIAS is signed with 16 fraction
     bits.
   - label = (sum ≥ 0). SCORE = sum >> 16, saturated to 32 bits.
   - BIAS is therefore *minus* the decision threshold.

A 64×128 window gives 128 × 36 = 4608 feature values and uses 4608 coefficients.

## Host interface

Each component has one word-addressed port: `*_addr`, `*_we`, `*_wdata` and `*_rdata`.
- The top address bit selects the data section.
- Register reads are combinational; writes take effect at the next clock edge.
- The data sections are write-only for the host.

**HOG** (`hog_addr`, `PIX_WORDS` data words)

| word | register | bits |
|---|---|---|
| 0 | HOG_CTRL | 0 HogEN (rw), 1 QuantStepOK (reads 0), 2 HogCacheMiss, 3 GaussOK (reads 0), 4 HogDone |
| 1 | IMG_DIM | [31:16] width, [15:0] height, in pixels |

**SVM** (`svm_addr`, `SV_WORDS` data words)

| word | register | content |
|---|---|---|
| 0 | SVM_CTRL | 0 SvmEN (rw), 1 QuantStepOK (QUANTIZE ≠ 0), 2 SvmCacheMiss, 3 SvmDone |
| 1 | QUANTIZE | step, 16 fraction bits |
| 2 | BIAS | signed, 16 fraction bits |
| 3 | FEATVEC_SIZE | number of feature values (4608 for 64×128) |
| 4 | RESULT | bit 0: label of the last window |
| 5 | SCORE | signed decision value of the last window |

The enable bits of both components work the same way:

- **Start.** Writing 1 to the enable bit while it is 0 starts a window and clears the done and
  miss bits.
- **Halt.** Writing 0 halts the component. Its engine is held in reset for as long as the
  enable bit is 0. On the SVM, a halt also empties the feature FIFO.
- **Finish.** At the end of the window the hardware sets the done bit and clears the enable
  bit itself.
- **Miss.** The hardware sets the miss bit. The host acknowledges it by writing the control
  register with the miss bit at 0 and the enable bit at 1.

The top also brings out one-cycle event pulses for observation: `hsync` (end of a block row),
`vsync` (end of the window), `hog_miss` and `svm_miss`.

### Loading the pixel cache

The pixel section is divided into `PIX_WORDS/128` slots; the default gives 2 slots. Slot
*s* holds the *tile* of block *n* when *n* mod slots = *s*.

- A tile is the 18×6 words the block needs: image rows by−1 … by+16 and pixels
  bx−4 … bx+19.
- Tile word (t, c) sits at address `s·128 + t·6 + c`.
- Pixels are packed four to a word, leftmost pixel in bits [7:0].
- Tile words that lie outside the image may hold anything. The fetch unit never uses them: it
  clamps rows to the image and builds edge words by replicating the edge pixel.

The host loads the first tiles, writes IMG_DIM and sets HogEN. Each time all slots have been
used and blocks remain, HogCacheMiss rises; the host loads the next tiles and acknowledges.
A 64×128 window at the default size needs 64 tile loads, which means 63 refill requests.
The tiles overlap, so a pixel is stored more than once. This is the price of a fixed,
easily-addressed layout.

### Loading the coefficients

The coefficient section holds one *chunk* of `SV_WORDS·4` coefficients (512 by default).
Coefficient 4i+j is in byte j of word i. The host loads chunk 0, then sets QUANTIZE, BIAS
and FEATVEC_SIZE.

When the feature index reaches the next chunk, and is still below FEATVEC_SIZE,
SvmCacheMiss rises; the host loads that chunk and acknowledges. A 64×128 window needs 9 chunks,
which means 8 refill requests.

While the SVM waits for a chunk, the HOG keeps running until the FIFO is full. The FIFO
holds 144 values, which is four block histograms.

## Pipeline and timing

All stage boundaries are output registers with valid/ready handshakes. Each stage runs its
own small state machine, which follows the original design where it gives one:

| stage | states | work per item |
|---|---|---|
| `hog_fetch` | read ×3, capture, offer, miss, wait | one input (3 words) every 4 cycles |
| `conv2d` | RESET, NOP, VCONV, HCONV | 6 inputs per block row. Shared subtractors compute Gy of the new word (VCONV), then Gx of the previous word once its right neighbour is known (HCONV). Emits 8 Gx/Gy pairs after columns 3 and 5 |
| `grad_stage` | per core: `mag_calc` NOP/MAG_PIPE, `bin_assign` NOP/TRY_BIN | 8 values per input. Magnitude: 1 cycle of squares, a one-entry buffer, then a 17-cycle square root (18 cycles for a lone value; the next value's squares overlap the root). Bin: 1–5 cycles |
| `hist_creat` | NOP, HIST_UPDT, EMIT | 8 cycles per input (one adder, sequential because bins repeat); 32 inputs per block |
| `hist_norm` | NOP, HIST_SUM (then divide), HIST_NORM | 36/CORES + 41 + 36/CORES cycles per block |
| serialiser in `hog` | | one value per cycle into the FIFO |
| `svm` | RESET, NOP, FETCH, CLASSIFY | CORES values per cycle; back to NOP after each 36-value block; cache read, `quant` and `lin_comb` each add one cycle |

With one gradient core, the square root limits the rate: 8 × 17 cycles per gradient input,
64 inputs per block. A 64×128 window at the default parameters takes about 650,000 cycles,
dominated by the gradient stage. `GRAD_CORES` = 2, 4 or 8 divides that time almost
proportionally. The `tb_grad_stage` testbench shows 8 cores doing the same work in 1/7 of the
busy time.

The square root is a restoring, one-bit-per-cycle unit (`isqrt`). It has the 33-bit input and
17-cycle latency of the vendor CORDIC core used in the original design, but is not pipelined.

## Parameters (top: `harva_top`)

| parameter | default | meaning |
|---|---|---|
| `PIX_WORDS` | 256 | pixel section size in words; a multiple of 128 here (the original allows multiples of 256) |
| `SV_WORDS` | 128 | coefficient section size in words (the original also allows 256) |
| `FIFO_DEPTH` | 144 | feature FIFO depth (four block histograms) |
| `GRAD_CORES` | 1 | magnitude + bin units: 1, 2, 4 or 8 |
| `NORM_CORES` | 1 | normalisation multipliers: 1, 2, 4, 6, 12, 18 or 36 |
| `SVM_CORES` | 1 | SVM lanes: 1, 2, 3 or 4 (must divide 36, at most 4) |

The memory sizes and FIFO depth are the original design's defaults. The core counts default
to 1, the smallest configuration.

## Where this RTL departs from the original design

- **Bus interfaces.** The AXI-Lite and AXI Full interfaces and the CPU are not included.
  They are replaced by the plain host ports above.
- **Square root.** The vendor CORDIC core is replaced by `isqrt`, with the same input width
  and latency.
- **Not built.** Gauss weighting of the magnitudes is left out, as the original design also
  leaves it out. There is no HOG-side quantisation either. GaussOK and QuantStepOK of
  HOG_CTRL therefore read 0.
- **Register bits.** HOG_CTRL follows the original register bit table. Some of the original
  test sequences number the miss and done bits differently.
- **Normalisation.** This follows v/(‖v‖₁ + ε) with ε the block minimum. The reciprocal is
  made once per block by a 41-cycle divider, then applied by multipliers.
- **Decision.** LIN_COMB adds the bias and compares with zero. The threshold form sum ≥ b
  becomes BIAS = −b.
- **Clocking.** The FIFO is single-clock. The original allows the two components to run at
  different frequencies.
- **Padding.** Edge padding is done in the fetch unit, which replicates the edge pixel. The
  original pads in the convolution stage and does not fix the padding value.
- **Own choices.** The tile layout of the pixel cache, the handshakes, the number formats and
  the RESULT/SCORE registers are this design's own.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values are computed
independently:

- **Arithmetic units** (`isqrt`, `mag_calc`, `bin_assign`, `quant`, `lin_comb`,
  `hist_norm`) are checked on random and corner inputs against direct formulas. Their
  latencies are checked too (17 and 18 cycles, the 1–5-cycle bin search, two cycles to done).
- **Stream units** (`conv2d`, `grad_stage`, `hist_creat`, `fv_fifo`) are checked under
  random backpressure against models built from the raw inputs.
- **`hog_fetch`** has every word compared with the image read with clamped coordinates, so
  all four kinds of edge padding are checked.
- **`tb_hog_cases`** runs the HOG alone at its default parameters on a 16×16 image (its
  first block is the whole image) and on a 64×16 image (two block rows, each ending with
  HSYNC and right-edge padding).
- **`tb_hog` and `tb_svm`** test each component alone with a host model, cache refills, a
  halt in the middle of a window and a restart.
- **`tb_harva_top`** is the end-to-end test at reduced sizes:
  - Setup: a 32×24 window, 4 gradient cores, 6 normalisation lanes, 2 SVM lanes, two windows.
  - Checks: every feature value entering the FIFO, the label, the score and the done bits.
  - Event counts: HSYNC, VSYNC, both kinds of refill, FIFO-full stalls, padded inputs and a
    restart. A failure is counted if any of these never happens.
- **`tb_harva_full`** runs the same flow on a 64×128 window with every parameter at its
  default. It takes about 650,000 cycles; on a desktop that is about a second of
  verilator time.

`tb/harva_ref_pkg.sv` holds the reference model: image generator, gradients, bins,
histograms, normalisation and score.

To simulate, for example the full-size test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/harva_pkg.sv tb/harva_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v harva_pkg) tb/tb_harva_full.sv --top-module tb_harva_full -o sim
./obj_dir/sim
```

The two packages must come first. `-Wno-fatal` keeps width warnings in the testbench
arithmetic from stopping the build. For another testbench, change the last file and
`--top-module`. The testbenches use `$urandom` only, with no constraint solver.

## Limits

- The detection quality of the original design cannot be reproduced here, because no trained
  weights or test images are included. The testbenches use random coefficients and synthetic
  images, and check bit-exact agreement with the reference model instead.
- There is no sliding window or image pyramid. The hardware classifies one window per run;
  the host must crop and scale frames.
- The square root is sequential, so one gradient core spends most of its time there.
