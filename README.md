# Deep-pipelined multi-head attention for a Vision Transformer

Multi-head attention offers a lot of parallel work, but it also moves a lot of
data. This RTL computes it with one long pipeline. Several stages are chained
through on-chip buffers, and each stage does one small part of the attention of
one head. Every stage works at the same time on a different (image, head)
pair. Intermediate matrices never leave the chip. The input images are fetched
once and reused by all heads, and the projection weights are fetched once and
reused by all images.

The structure follows the architecture described in *FPGA-Based
Deep-Pipelined Architecture for Vision Transformer's Multi-Head Attention*
(an OpenCL design on an Intel Agilex 7 board). That description gives the
stage split, the buffers, the use of systolic arrays, the on-chip memories and
single-precision arithmetic. It does not give the inner workings of any block.
Those are this design's own and are listed in
[Design choices not fixed by the architecture](#design-choices-not-fixed-by-the-architecture).

## What is computed

For every image and every head h:

```
Q = X W_Q[:, h]      K = X W_K[:, h]      V = X W_V[:, h]
A_h = softmax(Q K^T / sqrt(d_K)) V
```

X holds the image's tokens after positional encoding, one row per token. The
outputs A_h of all heads are placed side by side (concatenated) in an output
memory. The final linear projection of multi-head attention, and the patch
embedding that produces X, are not part of this hardware.

Default sizes (`rtl/vit_pkg.sv`) are those of the evaluated encoder:

| quantity | value | origin |
|---|---|---|
| image / patch size | 32 / 8 | encoder configuration |
| tokens per image (SEQ) | 16 | (32/8)^2 patches, no class token |
| hidden size (HIDDEN) | 768 | encoder configuration |
| heads (HEADS) | 12 | encoder configuration |
| head size d_K (HEAD_DIM) | 64 | 768 / 12 |
| systolic array width (ARRAY_COLS) | 16 | this design |
| images held on chip (IMG_SLOTS) | 2 | this design |
| 1/sqrt(d_K) | 0.125 | 1/sqrt(64) |

## The five stages

```
 image X ─┬─ [X·W_V] ─► V ─► (buffered 4 steps) ─────────────────────────────┐
          ├─ [X·W_Q] ─► Q ─► (buffered 2 steps) ─┐                            │
          └─ [X·W_K] ─► K ─► [transpose] ─► K^T ─┴─► [Q·K^T] ─► [softmax] ─► S ┴─► [S·V] ─► output memory
 stage:        0                   1                    2            3              4
```

| stage | unit | work per task | cycles per task (defaults) |
|---|---|---|---|
| 0 | three `matmul_engine`s, 16x16 arrays | Q, K, V = X·W (16x768 by 768x64), in 4 column tiles | 4·(1+768+31+16) = 3,264 |
| 1 | `transpose_unit` | K (16x64) into K^T (64x16) | 65 |
| 2 | `matmul_engine`, 16x16 array | Q·K^T (16x64 by 64x16) | 1+64+31+16 = 112 |
| 3 | `softmax_unit` | scale by 1/8, softmax of each of 16 rows | 16·49+1 = 785 |
| 4 | `matmul_engine`, 16x16 array | S·V (16x16 by 16x64), in 4 tiles | 4·(1+16+31+16) = 256 |

Every arrow between stages is a `mat_buffer`. V is produced in stage 0 and
consumed in stage 4, so it waits in a chain of four buffers. Q waits in a chain
of two. K, K^T, the scores and S each sit in a single double buffer. A chain of
D buffers is built as D+1 rotating slots. The producer writes one slot, the
consumer reads the slot written D steps earlier, and all slots move on
together.

## How tasks move: lock-step pipeline steps

`pipeline_ctrl` treats "one head of one image" as a task. Tasks enter in the
order (image 0, head 0), (0, 1), ..., (0, 11), (1, 0), and so on. Each image is
reused by consecutive tasks and the weights are reused by every image.

One **pipeline step** works like this:

1. The controller pulses `stage_start` for every stage that holds a task.
2. It waits until each of those stages has pulsed `stage_done`.
3. It pulses `advance` for one cycle. Every buffer rotates, and every task
   moves one stage on.

A step therefore lasts as long as its slowest active stage, plus three control
cycles. While projections are running, the slowest stage is always the
projection. A run of n images is n·12 tasks and takes:

```
cycles = n·12·STEP_PROJ + 3·T_SOFTMAX + T_CONTEXT + 3·(n·12 + 4)
       = n·12·3,264 + 3·785 + 256 + 3·(n·12 + 4)    (defaults)
```

That is about 41,800 cycles for one image. After the pipeline has filled, the
steady state is one head every 3,267 cycles. All five stages are busy at once
whenever at least five tasks are in flight. The testbenches count such steps.

Lock-step advance keeps the control simple and makes buffer ownership
obvious: during a step, each slot has exactly one writer or one reader. The
cost is that fast stages sit idle for the rest of the step. Because the
projection dominates, stage 0 sets the throughput. Widening its arrays
(`ARRAY_COLS`) or splitting it into more stages is the way to speed the
design up.

## Systolic arrays and data layout

This is the part that needs the closest reading.

### Output-stationary arrays

`systolic_array` is an N x M grid of `sa_pe`. PE(i,j) owns the result element
C[i][j]:

- Row data (A[i][k]) enters each row from the left and moves one PE right
  per cycle.
- Column data (B[k][j]) enters each column from the top and moves one PE
  down per cycle.

Row i is delayed by i skew registers and column j by j registers. PE(i,j)
therefore sees A[i][k] and B[k][j] together, i+j cycles after they entered. A
valid flag travels with the row data, so PEs only accumulate real products.
The last product reaches the far corner N+M-2 cycles after the last input.
`matmul_engine` waits N+M-1 cycles before reading out.

### Tiles

`matmul_engine` computes a product wider than its array one column tile at a
time. For a projection, A = X (16x768) and B = W_h (768x64). The array is
16x16, so the engine runs four tiles:

1. One cycle clears the accumulators.
2. 768 cycles stream the operands.
3. 31 cycles drain the array.
4. 16 cycles write the tile out, one row of 16 values per cycle.

### Memory and buffer layout

The engine reads its operands in a fixed way, and each memory layout is chosen
so that each read is a single access:

| store | one word holds | read by |
|---|---|---|
| input memory | feature k of all 16 tokens, X[0..15][k] | A port of the projections (one column of X per cycle) |
| weight memory | W[k][16c .. 16c+15] | B port of the projections (row k of the head's tile) |
| Q, K, V buffers | row i is a bank of 4 words of 16 values | Q: column reads by the Q·K^T A port; K: column reads by the transpose; V: row-segment reads by the S·V B port |
| K^T buffer | row c of K^T (feature c of every token) | B port of Q·K^T |
| score buffer | one row of Q·K^T | softmax, row by row |
| S buffer | one row of S | column reads by the S·V A port |
| output memory | 16 values of one row of the concatenated 16x768 result | readout port |

The three projection engines write the same way, one row segment at a time,
into row-banked buffers. Because of this layout, the transpose stage is a
column gather: at step c it reads value c of every token from the K buffer and
writes them as row c of K^T. The Q·K^T array then receives one row of K^T per
cycle on its column-data inputs.

## Arithmetic

All data is IEEE-754 single precision (`rtl/fp32_pkg.sv`):

- Multiply, add and divide round to nearest-even.
- Subnormal inputs count as zero, and subnormal results are flushed to zero.
- Infinity and NaN operands produce infinity. NaN is not propagated.
- Each PE does one multiply and one add per cycle, both combinational in the
  same cycle.

The softmax subtracts the row maximum before exponentiating. This is
mathematically the same softmax, and it cannot overflow. The exponential uses
e^x = 2^n · 2^f:

1. x is converted to fixed point and multiplied by log2(e).
2. 2^f is evaluated with a degree-6 polynomial in Q2.30.

The result is accurate to about 1e-5 relative. Results therefore agree with a
double-precision reference to about 1e-5 to 1e-4. They are not bit-identical
to a CPU computation, whose summation order also differs.

## Top-level interface (`mha_accel`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `num_images` | in | pulse to run images 0..num_images-1 (1..IMG_SLOTS) through all heads |
| `busy`, `done` | out | run in progress; one-cycle pulse at the end |
| `out_ready[i]` | out | all heads of image slot i are in the output memory; cleared by the next `start` |
| `x_wr_en/img/k/data` | in | load feature k of all tokens of an image slot |
| `w_wr_en/sel/addr/data` | in | load a weight word; `sel` 0/1/2 = W_Q/W_K/W_V, address k·48 + c holds W[k][16c +: 16] |
| `out_rd_img/row/word`, `out_rd_data` | in/out | combinational read of 16 result values, columns 16·word +: 16 of row `row` |

To use it:

1. Load the weights once.
2. Load up to two images.
3. Pulse `start`.
4. Wait for `done`, or for an image's `out_ready`.
5. Read the results.
6. Reload the image slots and run again.

Do not write any memory while `busy` is high. A 200-image mini-batch takes 100
runs of two images, with the weights loaded only once.

## Design choices not fixed by the architecture

- **Sequence length 16.** This comes from 32x32 images and 8x8 patches, with
  no class token.
- **Array sizes.** Five 16x16 arrays, 1,280 multiply-accumulators in all. This
  is the same order as the DSP count reported for the original build (1,644).
- **Lock-step pipeline control.** The controller uses start/done pulses with
  stage handshakes. The original description only says that the stages run
  concurrently on different images and heads.
- **Rotating-slot buffers** stand in for the chains of buffers.
- **Transposition as a column gather** between two buffer layouts.
- **Row-serial softmax** with one shared exponential unit and one shared
  divider, and subtraction of the row maximum.
- **Two images held on chip**, with ready flags on the output memory.
- **Combinational memory reads and a single-cycle multiply-add.** These keep
  the control simple. An FPGA implementation would register the block-RAM
  reads and pipeline the floating-point units, which adds a fixed latency to
  every engine.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. The
reference models are written in double precision (`tb/tb_fp_pkg.sv` converts
between the two formats).

| testbench | what it checks |
|---|---|
| `tb_sa_pe` | 2,000 random MACs, bit-exact against a reference rounded to single precision after every step; operand forwarding; clear |
| `tb_systolic_array` | random products, drain latency, restart after clear |
| `tb_matmul_engine` | tiled product, one write per element, exact cycle count |
| `tb_mat_buffer` | reads see the data written exactly DEPTH steps earlier, through both read ports |
| `tb_transpose_unit` | K^T = transpose of K, cycle count |
| `tb_softmax_unit` | against a reference softmax, row sums, a row of equal values and a dominant element, cycle count |
| `tb_weight_memory`, `tb_input_memory`, `tb_output_memory` | addressing; ready flags after the last head |
| `tb_pipeline_ctrl` | task order per stage, no advance before every stage is done, number of steps, five tasks in flight |
| `tb_attention_pipeline` | the kernel at reduced size (4 tokens, hidden 32, 4 heads) against a model of the attention equation |
| `tb_mha_accel` | the top at reduced size: two runs, weights reused without reloading, ready flags, run length, and counts of overlapping tasks, full pipeline, image and weight reuse, and head concatenation |
| `tb_mha_accel_full` | the top at default size: one image, all 12 heads, all 12,288 outputs against the model, run length (41,826 cycles measured) |

To build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fp32_pkg.sv rtl/vit_pkg.sv tb/tb_fp_pkg.sv tb/tb_mha_accel.sv \
    --top-module tb_mha_accel -Wno-fatal
./obj_dir/Vtb_mha_accel
```

Verilator finds the other modules through `-Irtl`. The full-size testbench
takes about 1.5 minutes to build and run.
