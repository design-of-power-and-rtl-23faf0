# Sobel edge detection and MAC on a 4-2 compressor multiplier

This design builds an 8x8 multiplier whose partial products are reduced by
**4-2 compressors** in two stages. It then uses that multiplier in two places:

* a **Sobel edge detector**, which squares the two image gradients with the
  multiplier to get the edge strength `sqrt(gx^2 + gy^2)`;
* a **multiply-accumulate (MAC) unit**.

The design family it comes from makes the multiplier cheaper by putting
*approximate* 4-2 compressors in the reduction tree. Their logic is not part of
this RTL. Every compressor here is the exact one, so every product and every
magnitude is exact. The section "Where this RTL stops" below says what an
approximate version would change.

## Block map

```
edge_mac_top
├── sobel_edge_detector            image in RAM -> stream of edge strengths
│   ├── image_ram                  IMG_W*IMG_H pixels, 1-cycle synchronous read
│   ├── window_extractor           two line buffers + 3x3 shift register
│   ├── sobel_gradient             the two 3x3 Sobel kernels
│   └── gradient_magnitude         |gx|^2 + |gy|^2 -> integer square root
│       ├── compressor_multiplier x2
│       └── isqrt
└── mac_unit                       acc += a*b
    └── compressor_multiplier
        └── compressor_row_4_2 x3  (one per reduction row)
            └── compressor_4_2 x16
                └── full_adder x2
```

`sobel_pkg` holds the operand width (`MULT_N = 8`) and the two Sobel kernels.
The edge detector and the MAC share only the clock and reset. Their ports
appear on the top with the prefixes `sobel_` and `mac_`.

## The compressor multiplier

A 4-2 compressor takes four bits of one column and a carry-in `cin` from the
column below. It returns a `sum` bit of the same weight and two bits of double
weight, `carry` and `cout`:

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)

`compressor_4_2` builds this from two full adders. `cout` comes from the first
adder, which sees only `x1..x3`, so `cout` never depends on `cin`. As a result,
a row of compressors chained cout-to-cin has no ripple path: its delay is two
full adders, whatever the width.

`compressor_multiplier` works in four steps:

1. It forms eight partial-product rows, `pp[j] = (x & {8{y[j]}}) << j`. These
   span 15 columns.
2. **Stage 1** compresses rows 0–3 and rows 4–7 in two separate
   `compressor_row_4_2` rows. This cuts the matrix height from 8 to 4.
3. **Stage 2** compresses those four operands to two.
4. A carry-propagate adder (`+`) adds the last two operands.

In a column-compression (Dadda-style) layout, each column gets only the
counters it needs. Here the tree is written as full rows of 4-2 cells over 16
columns instead. In columns where the dot matrix has fewer bits, the cells get
constant zeros, and synthesis reduces them to full or half adders. The
function and the two-stage depth are the same. Each row drops the carry out
of its top column. This is safe because every intermediate sum fits in 16
bits.

The product is 16 bits wide. A 15-bit product port would lose the final carry
for products of 32768 and above, for example 255*255.

## Edge detector dataflow and timing

The image lies in `image_ram` in raster order (`address = row*IMG_W + col`).
By default it is binary: 128x128 pixels of 1 bit. A `start` pulse starts a
scan that reads one pixel per cycle:

| cycle | what happens |
|-------|--------------|
| 0 | RAM read issued for (r, c) |
| 1 | pixel on `rdata`; at the clock edge it enters the line buffers and the 3x3 shift register |
| 2 | window centred on (r-1, c-1) valid if r ≥ 2 and c ≥ 2; gradients registered at the edge |
| 3 | gradients valid; magnitude registered at the edge |
| 4 | `out_valid`, `out_mag`, `out_row`, `out_col` |

* **Throughput.** After the first two rows are buffered, the detector produces
  one result per cycle.
* **Borders.** Only interior pixels become window centres, so an image gives
  `(IMG_W-2)*(IMG_H-2)` results. Nothing is padded.
* **End of scan.** `done` pulses together with the last result (centre
  `IMG_H-2, IMG_W-2`). It comes `IMG_W*IMG_H + 3` clock edges after the edge
  that samples `start`. A full 128x128 scan takes 16 387 cycles.
* **Locking during a scan.** `busy` is high from start to done. While it is
  high, RAM writes and new `start` pulses are ignored.

**Window.** `window_extractor` keeps the two previous image rows in two line
buffers. At column `c`, these buffers supply rows `r-2` and `r-1`, and the
incoming pixel is row `r`. The three pixels are shifted into the right-hand
column of the 3x3 register. `win[i][j]` has `i = 0` as the top row and `j = 0`
as the left column.

**Gradients** (`sobel_gradient`) use the standard kernels, laid out with row 0
at the top:

```
 gx:  1  0 -1        gy: -1 -2 -1
      2  0 -2             0  0  0
      1  0 -1             1  2  1
```

The weight 2 is a shift. For `PIX_W`-bit pixels, both gradients lie in
`±4*(2^PIX_W-1)`. They are carried as signed `PIX_W+4`-bit values.

**Magnitude** (`gradient_magnitude`) works in three steps:

1. It takes `|gx|` and `|gy|` and squares each one in a `compressor_multiplier`.
2. It adds the two squares into a 17-bit sum.
3. `isqrt`, a combinational restoring square root, returns `floor(sqrt(sum))`
   as 9 bits.

For the default binary image, the result lies between 0 and 5.

The 8-bit multiplier operands limit the pixel width to `PIX_W ≤ 6`, since
`4*63 = 252` still fits in 8 bits. An elaboration-time assertion checks this.

## MAC unit

`mac_unit` registers `acc + multiplier*multiplicand` on each cycle where `en`
is high. `clr` starts a new sum:

* `clr` with `en` loads the current product;
* `clr` alone clears the accumulator.

The accumulator is `ACC_W = 24` bits and wraps modulo 2^24. That is enough
for 256 products of 255*255. A term presented in one cycle shows up in
`mac_result` after that cycle's clock edge.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `MULT_N` | 8 | `sobel_pkg` | multiplier operand width. The tree structure assumes 8. |
| `IMG_W`, `IMG_H` | 128, 128 | top, detector | image size. The RAM holds `IMG_W*IMG_H` pixels. |
| `PIX_W` | 1 | top, detector | pixel width: 1 for a binary image, at most 6 |
| `ACC_W` | 24 | top, `mac_unit` | accumulator width |

All reset is asynchronous and active low (`rst_n`). The RAM and the line
buffers are not reset. They are always written before they are read.

## What follows the reference design and what is this design's own

**Taken from the reference design:**

* the two-stage 4-2 compressor reduction of an 8x8 multiplier;
* the use of that multiplier in a MAC unit and in Sobel edge detection;
* the flow of image into RAM, then window extraction, then x and y gradients,
  then their combined magnitude;
* the two Sobel kernels;
* the binary input image.

**This design's own choices:**

* the image size;
* the RAM organisation and its load port;
* the line-buffer window generator;
* the pipeline depth and the start/busy/done handshake;
* the use of the multipliers for the squares in the magnitude;
* the Euclidean norm with floor rounding, and the square-root circuit;
* the accumulator width and the MAC's clear/enable controls;
* the reset style;
* the 16-bit product.

The published RTL view shows a 15-bit product port.

## Where this RTL stops

* **Exact compressors only.** In the approximate multipliers of the reference
  work, some compressors would be approximate. There are three variants. A
  correction goes with them: either a constant correcting bit, or an error
  compensation module that detects one frequent input pattern. Their truth
  tables are not available, so none of this is built. To add them, replace
  `compressor_4_2` in the low columns of `compressor_row_4_2` with an
  approximate cell, and add the correction as an extra operand of the final
  adder. The testbenches check exact results. For an approximate multiplier
  they would have to check an error bound instead.
* **No binary edge map.** The detector streams edge strengths. It applies no
  threshold to turn them into a binary edge map.
* **Preprocessing is not hardware.** Converting a colour photograph to a
  resized binary image happens before the data reaches the RAM. The
  testbenches generate binary images directly.
* **Area and delay not reproduced.** The reference work compares the
  multiplier's FPGA area and delay with a conventional multiplier. This RTL
  does not reproduce those numbers.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog. For example,
with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sobel_pkg.sv tb/tb_edge_mac_top.sv --top-module tb_edge_mac_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_compressor_4_2` | all 32 input combinations, and that `cout` does not depend on `cin` |
| `tb_compressor_multiplier` | all 65 536 operand pairs |
| `tb_mac_unit` | random clear / load / accumulate / hold sequences, with wrap-around (20-bit accumulator) |
| `tb_image_ram` | read latency, hold, read-during-write |
| `tb_window_extractor` | every window of two random 9x7 images, one streamed with gaps |
| `tb_sobel_gradient` | random 6-bit windows and extreme cases, against the kernels written out term by term |
| `tb_gradient_magnitude` | all gx in ±252 against several gy each, checking `m² ≤ gx²+gy² < (m+1)²` |
| `tb_sobel_edge_detector` | two scans of random 12x9 3-bit images: every output, the count, the cycle count, and writes/starts ignored while busy |
| `tb_edge_mac_top` | the whole design at its default sizes (details below) |

`tb_edge_mac_top` runs the full design at its default parameters. It loads a
128x128 binary image of discs, a bar and noise, scans it, and checks all
15 876 magnitudes. At the same time it runs the MAC, including an accumulator
wrap. It also counts how often each mechanism occurred: ignored write,
ignored start, edge and flat outputs, and MAC clear, load, hold and wrap. If
any of them never happened, it reports a failure.
