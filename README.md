# Pipelined 2-D DCT, quantizer and zig-zag reorder for JPEG

This is the front half of a baseline JPEG encoder for grey-scale images.
Pixels come in on an 8-bit port, one per clock. Out come the quantized DCT
coefficients of each 8x8 block, in zig-zag order, 9 bits each, also one per
clock. An entropy coder can take them from there.

Two ideas keep the hardware small:

* **Scaled DCT.** Each 1-D DCT uses the Arai–Agostini–Naito
  factorisation. It needs only 5 constant multiplications per 8 points,
  but its outputs are scaled: every coefficient is off by a fixed factor
  that depends on its frequency.
* **Post-scale folded into quantization.** Quantization multiplies each
  coefficient by a per-position factor anyway. So the correction for the
  DCT's scaling is built into the quantizer table, and costs nothing.

The whole design uses 11 multipliers: 5 in each 1-D DCT and 1 in the
quantizer. It has 21 I/O pins. It was sized for a small FPGA with 18x18
hardware multipliers.

The RTL follows the architecture of the paper *Implementation of Pipelined
Architecture Based on the DCT and Quantization For JPEG Image Compression*:
its block structure, bit widths, algorithm, tables, stage timing and
latencies. The handshake, the arithmetic precision, saturation and the
buffer sequencing details were not published. They are this design's own,
and are marked as such below and in each file's header.

## Data path

```
 data_in  8b   +-------+ 11b +-----------+ 11b +-------+ 13b +-----------+ 9b +-----------+ 9b
 ------------->| dct1d |---->| transpose |---->| dct1d |---->| quantizer |--->|  zigzag   |----> data_out
 (pixel-128)   | rows  |     |  buffer   |     | cols  |     | x Q/4096  |    |  buffer   |      + rdy
               +-------+     +-----------+     +-------+     +-----------+    +-----------+
                   ^  stat      ^addr in/out     ^  stat       ^ position       ^addr in  ^ zig-zag ROM
                   |            |                |             |                |         |
               +----------------------------- dct_controller ---------------------------------+
```

| module | role |
|---|---|
| `dct1d` | serial 8-point scaled 1-D DCT; instantiated 8→11 bit (rows) and 11→13 bit (columns) |
| `transpose_buffer` | 128 x 11-bit two-port RAM, asynchronous read |
| `quantizer` + `quant_rom` | 13-bit x 12-bit multiply, divide by 4096, round, 9-bit result |
| `zigzag_buffer` + `zigzag_rom` | 128 x 9-bit two-port RAM with registered read; ROM maps scan index to position |
| `dct_controller` | enables, buffer addresses, write enables, ready strobe |
| `dct_quant_zigzag` | top level |
| `jpeg_dct_pkg` | shared widths and types |

## The serial scaled 1-D DCT (`dct1d`)

For an 8-point row x, the unit computes y' = C x, where y = s .* y' would be
the DCT (with c_n = cos(nπ/16)):

    s = [c4, c7/c6, c6/c4, c5/c2, c4, c3/c2, c2/c4, c1/c6]

The computation is six steps of butterflies. Only step 4 multiplies, by
m1 = c4, m2 = c6, m3 = c2 − c6 and m4 = c2 + c6:

| step | operations |
|---|---|
| 1 | a0=x0+x7, a1=x1+x6, a2=x3−x4, a3=x1−x6, a4=x2+x5, a5=x3+x4, a6=x2−x5, a7=x0−x7 |
| 2 | b0=a0+a5, b1=a1−a4, b2=a2+a6, b3=a1+a4, b4=a0−a5, b5=a3+a7, b6=a3+a6, b7=a7 |
| 3 | d0=b0+b3, d1=b0−b3, d2=b2, d3=b1+b4, d4=b2−b5, d5=b4, d6=b5, d7=b6, d8=b7 |
| 4 | e2=m3·d2, e3=m1·d7, e4=m4·d6, e6=m1·d3, e7=m2·d4; the others pass through |
| 5 | f2=e5+e6, f3=e5−e6, f4=e3+e8, f5=e8−e3, f6=e2+e7, f7=e4+e7; f0=e0, f1=e1 |
| 6 | y'0=f0, y'1=f4+f7, y'2=f2, y'3=f5−f6, y'4=f1, y'5=f5+f6, y'6=f3, y'7=f4−f7 |

Data enters and leaves one word per clock, and each step takes one clock.
Counting clocks from a row's first sample:

| clocks | what happens |
|---|---|
| 1–8 | x0..x7 shift into the input register (`din → x[7] → … → x[0]`) |
| 9–14 | steps 1..6; step 1 reads the full input register in the same clock as x0 of the next row shifts in |
| 15–22 | y'0..y'7 shift out of the output register; step 6 of the next row reloads it in clock 22 |

So rows follow back to back. One row takes 22 clocks from first sample to
last coefficient, and the first coefficient appears 14 clocks after the
first sample. `stat` goes high with the first y'0 and stays high. The step
registers load on every enabled clock; only results that follow a complete
row reach the output register.

Arithmetic (this design's choice): m1..m4 are held with `FRAC` = 12
fractional bits. Steps 4–6 keep those fractional bits. The result is rounded
once, halves up, and saturated to `OUT_W`. Steps 1–3 grow the word by 3 bits.
In the 11-bit stage every product is at most 14 x 14 bits, so each fits one
18x18 hardware multiplier.

## Folding the post-scale into quantization (`quantizer`, `quant_rom`)

The 2-D result of the two passes is Y' = C X Cᵀ. The true coefficient is
S .* Y' with S = s sᵀ. JPEG quantization divides it by the step q(u,v) of the
luminance table. This transform's scaling is twice the orthonormal DCT per
dimension, which gives the factor 4 below. So one multiplication does
everything:

    Yq(u,v) = round( Y'(u,v) · Q(u,v) / 4096 ),   Q(u,v) = round( s_u s_v / (4 q(u,v)) · 4096 )

`quant_rom` holds the 64 values of Q, from 32 at (0,0) to 68 at (7,7). Row u
is the vertical frequency and column v the horizontal one. Every entry
follows the formula with the standard JPEG luminance table, except (6,5),
which holds 19 instead of 10 (a modified step, kept as published).

The quantizer rounds halves away from zero, like a floating-point `round()`,
and saturates to 9 bits. With this table saturation cannot occur:
4096 · 68 / 4096 < 256. The quantizer is combinational, and its result is
written into the zig-zag buffer in the clock the coefficient leaves the
second DCT.

## Buffers and sequencing (`dct_controller`)

This is where the timing of the whole pipeline is decided. Both buffers
have 7-bit addresses, so each holds two 64-word halves. One half fills
while the other is read. The top address bit is simply the block count's
least significant bit.

**Transpose buffer.** The first DCT's coefficients are written at a counter
address 0, 1, 2, …, 127, which is row·8 + column within each half. Reading
starts in the clock in which write address 65 is presented. It uses a
second counter k with its two 3-bit fields swapped:
`{k[6], k[2:0], k[5:3]}`, giving 0, 8, 16, …, 56, 1, 9, …, 63, then 64, 72, ….
From that clock on, the second DCT is enabled, and it receives columns. By
the time a half is read, all 64 of its words have been written. The next
write into that half comes only after its last read, so the two never
collide (an assertion checks this). The read port is asynchronous, so data
follows the address in the same clock.

**Column order out of the second DCT.** The samples enter row by row, so the
second DCT emits coefficient (u,v) as output number 8v + u of its block, one
column of frequencies at a time. The controller therefore gives the
quantizer ROM, and the zig-zag buffer's write port, the position
`8u + v` = the output count with its 3-bit halves swapped. This keeps the
table in its natural row-major form. It also makes the output follow the
standard JPEG zig-zag scan (0,0), (0,1), (1,0), (2,0), …. With a plain
counter on those ports, the output would follow the transposed scan. The
published description only says the write address is "normal". The swap is
this design's reading, chosen because it yields the standard order.

**Zig-zag buffer.** Reading uses a running 7-bit count. The `zigzag_rom` turns
its low six bits into the row-major position of the n-th zig-zag
coefficient, and passes the half bit through. Reading need not wait for the
whole block. It may start once every coefficient is certain to be stored
before the scan asks for it. With the column-order writes above, the worst
case is coefficient (6,0): it is zig-zag index 21 but the 49th write of its
block. Hence reading starts with the 30th write (`ZZ_DELAY` = 29). That is
the smallest safe value, and it gives the published overall latency. The
read port is registered, and this register is the output register.

**Timeline of the first block** (enabled clocks; clock 1 carries the first sample):

| clock | event |
|---|---|
| 1–8 | first row enters the row DCT |
| 15 | first row coefficient; transpose write address 0 |
| 80 | transpose write address 65: first transposed read, column DCT starts |
| 94 | first column coefficient; quantized and written to the zig-zag buffer |
| 123 | 30th zig-zag write; first zig-zag read |
| 124 | first coefficient on `data_out`, `rdy` high |
| 124 + 64k + n | coefficient n of block k |

So the 2-D DCT alone has a latency of 94 clocks, and the system as a whole
has 124 clocks counting the first sample's clock as clock 1, i.e. 123
clocks between first sample and first coefficient. Throughput is one
coefficient per clock, one block per 64 clocks, with no gaps between
blocks.

## Interface (`dct_quant_zigzag`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `clr` | in | 1 | synchronous clear, active high; restarts all sequencing |
| `en` | in | 1 | pipeline advance: a clock with `en` high takes one sample and moves everything one step; with `en` low everything holds |
| `data_in` | in | 8 | pixel − 128 as two's complement (for 8-bit pixels: invert the MSB); blocks back to back, each row by row, left to right |
| `data_out` | out | 9 | quantized coefficient, two's complement, zig-zag order |
| `rdy` | out | 1 | high for exactly one clock with each new `data_out`; follows an enabled clock |

`en` is a clock enable for the whole pipeline, so a source may pause at any
sample. Nothing drains the pipeline by itself. After the last real block,
keep `en` high for another 123 clocks (any data) to get its 64 coefficients
out. The coefficients that follow belong to that filler data. Cutting the
picture into 8x8 blocks (e.g. with line buffers after a camera) is outside
this design.

## Numerical range and accuracy

* The row stage delivers 11 bits. y'1 of an 8-bit row reaches ±1282 for a
  row that follows the first cosine exactly, so such extreme rows saturate.
* The column stage delivers 13 bits (±4095). The DC term Y'(0,0) is the sum of
  the 64 level-shifted samples. It exceeds 13 bits when a block's mean is
  more than 64 levels away from mid-grey. Such blocks (very bright or very
  dark) saturate at a quantized DC of about ±32 instead of up to ±64. These
  widths are the published ones. Widening `COL_W` in `jpeg_dct_pkg` to 14
  removes the limit, at the cost of a 14-bit multiplier input.
* On a 64x48 synthetic picture (48 blocks, including saturating bright
  blocks, which the reference models as clamped), 3069 of 3072 outputs
  equal the rounded floating-point result. The rest are off by one, and the
  mean squared error against the unrounded result is 0.021. On random
  blocks the figures are similar (MSE 0.024).

## Departures from the published design and open points

* The handshake (`en` as a pipeline advance, `rdy` as a one-clock strobe),
  the synchronous clear and the level-shifted input format are not
  specified in the source. The port names and widths are.
* Multiplier precision (12 fractional bits), the single rounding point,
  saturation, and round-half-away-from-zero in the quantizer are this
  design's choices.
* The quantizer and zig-zag write addressing use the coefficient's row-major
  position, not a plain counter (see above).
* The published waveform of the transpose buffer shows a 14-bit data
  display. The 11-bit width printed for the buffer itself is used.
* Table entry (6,5) is 19 as published, not the formula's 10.
* The source quotes 2470 ns per 8x8 block at 84.81 MHz, about 209 clocks.
  That does not follow from its own stage timing: here a block takes 187
  clocks from first sample to last coefficient, and blocks follow every 64
  clocks. No clock frequency is claimed for this RTL.

## Simulation

All files are SystemVerilog-2017. Each testbench checks itself, prints
`TB_RESULT checks=N failures=M`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/jpeg_dct_pkg.sv tb/tb_dct_quant_zigzag.sv --top-module tb_dct_quant_zigzag -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_dct_quant_zigzag` | whole design at default parameters. Smooth, random, flat and edge blocks are checked against a floating-point model; also the latency of 124 clocks, gap-free output, random stalls, a clear in mid-stream, and both halves of both buffers |
| `tb_image_workload` | 64x48 synthetic picture end to end, MSE, exact clock of every output coefficient |
| `tb_dct1d` | both widths against the DCT definition; the timing (first coefficient in clock 15); saturation; stalls |
| `tb_dct_controller` | every address, enable and strobe against independent counters, with stalls |
| `tb_transpose_buffer`, `tb_zigzag_buffer` | storage, write enable, read timing, clear |
| `tb_quant_rom`, `tb_quantizer` | table against its formula; rounding including exact halves |
| `tb_zigzag_rom` | all 128 addresses against a scan generated by walking the anti-diagonals |

The reference models in the testbenches compute the DCT directly from its
cosine definition, never from the factorised algorithm. They build the
quantizer table from the JPEG luminance table, not from the ROM.

## Changing it

* Stage widths live in `jpeg_dct_pkg` (`ROW_W`, `COL_W`, `ZZ_W`, …).
  `dct1d` takes `IN_W`, `OUT_W` and `FRAC` as parameters.
* A different quantization table means recomputing `quant_rom` with the
  formula above.
* `ZZ_DELAY` in `dct_controller` must stay at least 29 as long as the write
  order is column-major. Larger values only add latency.
