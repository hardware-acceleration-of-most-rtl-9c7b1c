# Block statistics engine for the MAD image quality index

Most Apparent Distortion (MAD) is a full-reference image quality index: it
compares a distorted image with its original. Its "appearance" stage filters
both images with a bank of log-Gabor filters. For every filtered image it then
measures the local texture as the standard deviation, skewness and kurtosis of
small blocks. There are a great many such blocks: a block is 16x16 pixels and a
new one starts every 4 pixels in each direction, so neighbouring blocks overlap
by 75%. This statistics step is where most of the stage's time goes.

This RTL computes that step in hardware. It takes two images at a time, for
example the filtered original and the filtered distorted image. For every block
position it writes back three numbers per image: std, skw and krt. The
filtering, the FFTs and the combination of the difference maps are not part of
it. They stay in software.

The engine is split into three kernels joined by FIFO channels:

```
               descriptor channel            result channel
 global  ->  control_loop ==> stats_appearance ==> write_data  ->  global
 memory         (read)     ==>  (compute)                    (write)  memory
               data channel (rows of both images)
```

* `control_loop` walks over the block positions. For each one it sends a
  descriptor and reads the block's 16 rows from memory into the data channel.
* `stats_appearance` turns each block into std, skw and krt for both images.
* `write_data` writes each result to its place in the output array.

No stop signal runs between the kernels. A kernel simply waits while its input
channel is empty or its output channel is full.

## What is computed

For an image of 4P x 4P pixels there are P x P block positions (ix, iy). Block
(ix, iy) covers pixel rows 4ix .. 4ix+15 and columns 4iy .. 4iy+15. A position
is *in range* when the block fits inside the image:
4ix < 4P-15 and 4iy < 4P-15. This holds for the first P-3 positions in each
direction. For an in-range block of 256 pixels x with mean m:

```
M2 = sum (x-m)^2     M3 = sum (x-m)^3     M4 = sum (x-m)^4
std = sqrt(M2 / 255)
s   = sqrt(M2 / 256)
skw = (M3 / 256) / s^3      krt = (M4 / 256) / s^4      (both 0 when s = 0)
```

The result of block (ix, iy) goes to output index ix*P + iy. An out-of-range
position gets zeros in all three outputs. Note the two normalisations: std uses
255 (the sample standard deviation), while skw and krt use 256.

## Exact integer arithmetic

The reference algorithm uses single-precision floating point. This design uses
integers and makes the moment sums exact. The pixels are 16-bit unsigned codes.
Instead of the mean m = S/256 (S is the block sum), the second pass uses the
scaled deviation

```
d = 256*x - S        (25-bit signed, exact)
```

and accumulates a2 = sum d^2, a3 = sum d^3 and a4 = sum d^4. These are exactly
256^2 M2, 256^3 M3 and 256^4 M4, with no rounding anywhere. The widths are
chosen so that nothing can overflow for any pixel values:

| sum | width  | type     |
|-----|--------|----------|
| S   | 24     | unsigned |
| a2  | 56     | unsigned |
| a3  | 81     | signed   |
| a4  | 104    | unsigned |

The finaliser (`stats_finalize`) rewrites the formulas in terms of the scaled
sums, so every result becomes one integer division or square root:

```
std_v = isqrt(a2 / 255)                         = std * 2^8   (exact floor)
r     = isqrt(a2 << 16)                         ~ sqrt(a2) * 2^8
skw   = sign(a3) * (|a3| << 28) / (a2 * r)      ~ skw * 2^16
krt   = (a4 << 24) / a2^2                       = krt * 2^16  (exact floor)
```

Each result is a 32-bit word:

* std has 8 fraction bits, in pixel-code units.
* skw is two's complement with 16 fraction bits.
* krt is unsigned with 16 fraction bits.

std and krt are the exact floor of the true value. skw is within about 2 LSB,
because r carries the only rounding. A result too large for its format
saturates to the largest code, or the most negative one for skw. This can only
happen for krt or skw of blocks that are almost flat with a few outliers.

The divisions and roots are done by `div_iter` (restoring division) and
`isqrt_iter` (digit-by-digit root). Both produce STEPS result bits per clock,
8 by default. The finaliser runs in two phases for both images at once:

1. a2/255, the root for skw and the krt division.
2. The root for std and the skw division.

Together the two phases take 15 cycles per block. The moment stage takes 17
cycles per block, so the finaliser keeps up. Raising STEPS shortens the
finaliser but lengthens its logic paths. Lowering it saves area until the
finaliser, not the moment stage, sets the rate.

## The computation kernel in detail

`stats_appearance` is a three-stage pipeline with one block in each stage:

1. **`block_sum`** takes a descriptor. For an in-range block it takes 16 rows
   of both images, one row per cycle. It writes each row into a free bank of
   `block_buffer` and adds the 16 pixels (in one cycle) into the block sum. It
   then passes the descriptor, the bank number and the sums on through a small
   queue (SUM_DEPTH, 4 by default).
2. **`stats_moments`** reads the bank back, again one row per cycle. It forms
   d, d^2, d^3 and d^4 for all 16 pixels of the row in parallel, adds them
   into row partial sums, and adds those into the block totals. It releases
   the bank in the cycle that issues the last read. It takes the next block
   while the previous result leaves, so blocks follow each other every 17
   cycles.
3. **`stats_finalize`** turns the sums into std, skw and krt (see above).

`block_buffer` has two banks of 16 rows, each row holding 16 pixels of both
images. One block is filled while the previous one is being read, so the first
two stages overlap. The first pass reserves a bank when it has filled it, and
the second pass frees it with its last read. The first pass may take its next
descriptor in the cycle of the release and writes the first row one cycle
later. A bank is therefore never
overwritten while it is in use. An assertion in `block_sum` checks this.

Out-of-range descriptors carry no rows. They flow through all three stages in
order, reserve no bank and come out with zero results. The queue after
`block_sum` lets such descriptors wait for the second pass without holding up
the load of the next in-range block. Without it, the three out-of-range
positions at the end of every row cost about one block time each.

## Reading memory and the credit scheme

The memory read port is row based:

* Request: `rd_valid`/`rd_ready` carry `rd_addr`. This is the pixel address
  row*4P + col of the first pixel of a 16-pixel row. Both images use the same
  address.
* Response: the memory answers with `rsp_valid` and `rsp_data`, the 16 pixels
  of that row of every image. Responses come in request order, any number of
  cycles later, and cannot be refused.

Because responses cannot be refused, `control_loop` must never ask for more
rows than the data channel can take. It keeps a credit counter:

* The counter starts at DATA_DEPTH, the depth of the data channel in rows.
* Each request spends one credit.
* Each row the computation kernel takes out of the channel returns one credit
  (`data_pop`).

The data channel can therefore never overflow, however long the memory takes.
The channel is the buffer that hides memory latency: with DATA_DEPTH = 32, two
whole blocks can be in flight. If memory is slower than that, `control_loop`
waits for credits.

Packing:

* `rsp_data` and the rows inside the design are
  `[NUM_IMG-1:0][15:0][15:0]`. Element [m][k] is pixel k (0 = leftmost) of
  image m.
* Images are stored row-major, one pixel per address.
* `wr_data` is `stats_t [NUM_IMG-1:0]`. Each `stats_t` is a packed
  `{std_v, skw, krt}` with std_v in the top 32 bits.

## Control and timing

Operation:

1. Drive `cfg_p` with P, from 4 to 1024. The largest image is 4096 x 4096.
2. Pulse `start`.
3. `busy` stays high until the last result has been written. `done` pulses for
   one cycle at the end, after all P^2 writes.

Timing with a memory and a write port that never stall:

* `control_loop` issues an in-range block in 17 cycles: one descriptor cycle
  and 16 row requests.
* Both passes of the computation kernel also take 17 cycles per block. The
  second pass needs 16 reads plus one cycle to start. It starts the next block
  in the cycle in which the previous result leaves.
* The two banks of the block buffer form a loop: a bank freed by the second
  pass must be refilled by the first before the second pass can use it again.
  The release and the refill are timed so that this loop also takes 2 x 17
  cycles.
* An out-of-range position costs about 4 cycles on average. Nearly half of
  them are in the last three rows of positions, which pass through the
  finaliser one at a time.

The full 512 x 512 run (P = 128) takes 268,798 cycles in simulation: 15,625
in-range and 759 out-of-range positions, which is 17.2 cycles per in-range
block. The latency from a block's first row to its result is about 50 cycles.

Memory bandwidth: while the pipeline is full the design reads one 512-bit row
(16 pixels of 16 bits, two images) in 16 of every 17 cycles. Each pixel is read
16 times because the blocks overlap. Reusing the overlap between neighbouring
blocks would cut this, but this design does not do it.

## Image sizes

The statistics step was evaluated on pairs of images from 512 x 512 up to
4096 x 4096. Nothing on chip depends on the image size: the buffers hold one or
two blocks, and the index widths cover P up to 1024. All four sizes run at the
default parameters. The cycle counts below are for a memory that keeps up.
They come to 17 cycles per in-range block plus about 4 per out-of-range
position.

| image     | P    | positions | in range  | cycles    |
|-----------|------|-----------|-----------|-----------|
| 512x512   | 128  | 16,384    | 15,625    | 268,798   |
| 1024x1024 | 256  | 65,536    | 64,009    | 1,094,526 |
| 2048x2048 | 512  | 262,144   | 259,081   | 4,417,150 |
| 4096x4096 | 1024 | 1,048,576 | 1,042,441 | 17,747,070 |

All four were simulated at the default parameters with every result checked.

## Where this design departs from the OpenCL original

The original is a set of OpenCL kernels for an FPGA. The overall structure
follows it:

* control, compute and write-back kernels;
* channels between them;
* the control kernel reading the data;
* two images per pass;
* a local block buffer;
* row-wise partial sums with the 16 pixels of a row handled in parallel;
* the 255/256 normalisations and the zero case;
* the in-range limit and the output indexing.

The differences:

* **Numbers.** Pixels are 16-bit integers and results are fixed point, not
  single-precision floats. The moment sums are exact (see above). Inputs that
  are really floats have to be quantised to 16 bits first.
* **Rate.** The OpenCL compiler's loops start one row per cycle. Here a block
  takes 17 cycles: one cycle for the descriptor and one per row.
  No clock frequency is claimed. The original ran at about 190-225 MHz
  depending on the variant.
* **Block walk.** Row and column counters replace the modulo arithmetic of the
  original control loop. The order is the same: row-major, column index
  fastest.
* **Output index.** The original index formula has the 512 x 512 value of P
  built in. Here it is ix*P + iy for any P.
* **Output layout.** The three outputs of both images are written as one word
  per index, not as three separate float arrays per image.
* **Memory interface.** The memory interface, the credit scheme, the two-bank
  buffer, the queue between the passes, the channel depths and the
  start/busy/done handshake are this design's own choices. The original relies
  on the OpenCL runtime and the vendor's memory system.

## Files

| file | contents |
|------|----------|
| `rtl/mad_pkg.sv` | constants, widths, descriptor, moment and result types |
| `rtl/mad_stats_top.sv` | top: the three kernels and three channels |
| `rtl/control_loop.sv` | block walk, row reads, credits |
| `rtl/chan_fifo.sv` | channel FIFO (first-word fall-through) |
| `rtl/stats_appearance.sv` | computation kernel |
| `rtl/block_sum.sv` | first pass: load rows, block sum |
| `rtl/block_buffer.sv` | two-bank local block memory |
| `rtl/stats_moments.sv` | second pass: exact moment sums |
| `rtl/stats_finalize.sv` | std, skw, krt from the sums |
| `rtl/div_iter.sv`, `rtl/isqrt_iter.sv` | iterative divider and square root |
| `rtl/write_data.sv` | write-back kernel |
| `tb/tb_ref_pkg.sv` | double-precision reference model, exact moments, test blocks |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mad_pkg.sv tb/tb_ref_pkg.sv tb/tb_mad_stats_top.sv \
  --top-module tb_mad_stats_top -Mdir obj && ./obj/Vtb_mad_stats_top
```

Replace the testbench name to run the others:

* **`tb_mad_stats_top`** runs the whole engine on a 48 x 48 image pair. It uses
  a behavioural memory with random latency, refused requests and refused
  writes, and small channels so that they fill. It counts each mechanism it
  must have exercised and fails if one never happened: memory stalls, credit
  waits, a full descriptor channel, loading one bank while the other is held,
  write back-pressure, and in-range, out-of-range and zero-variance blocks. A
  second run without stalls checks the cycle budget.
* **`tb_mad_stats_top_full`** runs the engine at its default parameters on a
  512 x 512 pair. It checks all 16,384 results against the reference and the
  cycle count. It takes a few seconds.
* **`tb_mad_stats_top_sizes`** does the same for 1024 x 1024, 2048 x 2048 and
  4096 x 4096 pairs, one after the other. It takes about two minutes.
* The block testbenches check the cycle counts given above:
  * 17 cycles per block in `control_loop`;
  * 16 consecutive rows in `block_sum`;
  * 17 cycles per block in `stats_moments`;
  * at most 15 cycles in `stats_finalize`.

The reference in `tb_ref_pkg` computes the statistics in double precision
straight from the pixels. The tolerances are 1/256 for std, 2/65536 plus 1e-4
relative for skw, and 1/65536 plus 1e-6 relative for krt.

Limits worth knowing:

* The engine assumes the memory returns rows in request order.
* cfg_p must not change during a run.
* Pixel values are taken as unsigned codes.
* The assertions (channel handshakes, bank reuse, credit overflow) are active
  in simulation only when assertions are enabled.
