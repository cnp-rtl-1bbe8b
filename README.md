# CNP — a streaming processor for convolutional networks

Convolutional networks spend almost all of their time in 2-D convolutions.
Between convolutions they apply point-wise squashing and spatial subsampling.
This RTL implements the hardware half of the ConvNet Processor (CNP), an
FPGA design for running such networks in small embedded vision systems:

* a **vector ALU (VALU)**. Each of its instructions consumes one or two
  streams of samples and produces one stream, at one input sample per clock
  cycle;
* a **multi-port memory controller**. It lets several units stream to and
  from one external memory at the same time, with a **priority manager** that
  hands out the memory one access per cycle.

In the full system, a soft processor on the same FPGA sequences the network
by software. It loads kernels, sets up memory streams and issues VALU
instructions. Camera and display managers move frames in and out of memory.
Those parts are not in this RTL. Their connections are ports of the top
level, `cnp_top`.

```
             control (from the soft processor)
                        |
      +-----------------v------------------+        +-----------------+
      |               VALU                 |  x,y   |  multi-port      |  port 3  CPU memory I/O
      |  conv2d -> +y -> pool2d            |<-------|  memory          |  port 4  video manager
      |  dot_unit, nonlin, sqrt, mul, div  |------->|  controller      |  port 5  display manager
      +------------------------------------+   z    |  + prio_arbiter  |
                                                    +--------+--------+
                                                             | one access / cycle
                                                      external memory
```

## The convolver

The 2-D convolution instruction computes, for a K×K kernel `ker`, an input
plane `x` of width W, and an optional plane `y` to accumulate onto:

    z[i][j] = y[i][j] + sum_{m=0..K-1} sum_{n=0..K-1} x[i+m][j+n] * ker[m][n]

The input plane arrives as a raster stream, one sample per step, and is
never stored whole. `conv2d` holds a K×K grid of multiply-accumulate cells.
Every incoming sample goes to all K² multipliers at once. How the partial
sums move is the part of the design that needs the most care:

* **Within a kernel row** the cells form a transposed FIR filter. Cell
  `(m,n)` adds `x·ker[m][n]` to the value that cell `(m,n-1)` held one step
  earlier, and cell `(m,0)` starts from the row input. After K steps the last
  cell of row m holds `row_in + Σ_n x[t-K+1+n]·ker[m][n]`.
* **Between rows**, that row result must meet the samples exactly one image
  line (W samples) later. The register chain already delays it by K steps,
  and the transfer into row m+1 takes one more. A delay line of **W−K**
  steps therefore makes up the rest. There are K−1 such lines (`line_delay`,
  one RAM each). Row 0 starts from zero.
* The value that enters the last cell of row K−1 is then the complete window
  sum for the window whose bottom-right corner is the sample now arriving.
  It is used combinationally, in the same cycle, so there is no output
  latency to track. A window is complete when the incoming sample sits at
  row ≥ K−1 and column ≥ K−1. The output plane is therefore
  (H−K+1)×(W−K+1), for example 512×384 → 506×378.

The delay lines are circular buffers driven by one pointer that cycles
through 0 … W−K−1, so the plane width is a run-time setting up to
`W_MAX`. When W = K the lines are bypassed. Partial sums that are still
filling at the start of a plane never reach a valid output, so nothing has
to be cleared between planes. Kernels smaller than K run by zero-padding
them to K×K.

After the convolution the y sample is added, if `cfg_use_y` is set. Then
`pool2d` averages non-overlapping P×P windows (P = 1, 2 or 4). It keeps a
horizontal running sum and a one-line buffer of window partial sums. It
emits on the last sample of each window and drops incomplete windows at the
right and bottom edges (247×183 → 123×91 for P = 2). With P = 2, one
instruction computes a convolution layer and the subsampling layer after
it.

A layer whose output map depends on several input maps is a chain of
convolutions. Each pass reads the previous partial result as y.

## The other VALU instructions

| op | result | notes |
|----|--------|-------|
| `OP_CONV` | pool(conv(x) + y) | above |
| `OP_DOT` | y + Σ_k v[k]·x^k per pixel | the n ≤ `N_MAX` planes are interleaved in the x stream (n samples per pixel); the vector is loaded like a kernel |
| `OP_NONLIN` | g(x), a piecewise-linear approximation of A·tanh(B·x) | see below |
| `OP_SQRT` | √x | truncated digit-by-digit root; negative x gives 0 |
| `OP_PROD` | x·y element-wise | saturated |
| `OP_DIV` | x / y element-wise | truncated; y = 0 gives the largest value of x's sign |

**Squashing function.** There are `NSEG` segments, each `g(x) = a_i·x + b_i`
for `l_i ≤ x < l_{i+1}`. The slope is restricted to `a_i = 2^-m_i + 2^-n_i`
with m, n ∈ 0…5, so a segment costs two shifts and an add, with no
multiplier. Segment 0 extends to −∞. The segment table is loaded by the
processor. Each 32-bit entry is `{l_i[15:0], m_i[2:0], n_i[2:0], b_i[9:0]}`,
where b is a signed Q2.8 offset. A shift code of 6 or 7 drops its term,
which gives the flat tails of tanh. That last feature goes beyond the
published design, whose slopes are always sums of two powers of two. An
8-segment table stays within 0.063 of 1.7159·tanh(2x/3) on [−4, 4]; the
testbench `tb_nonlin` shows how it is built.

## Number format

Samples are 16-bit signed Q8.8. Products are Q16.16, and sums are kept in
40-bit accumulators, enough for the 49 products of a 7×7 window plus y.
Every instruction rounds its result toward −∞ (arithmetic shift) and
saturates it to Q8.8. The average in pooling is a shift by 2·log2 P.

## Stream control and timing

All streams use valid/ready. The VALU datapath advances one sample (`step`)
when all three of these hold:

1. x is valid;
2. the y sample this step needs, if any, is valid;
3. the one-entry output register is free or being emptied, if this step
   produces a result.

Whether a step needs y or produces a result depends only on the raster
position and channel counters, not on data. The decision is made before
the step is committed. Results appear one cycle after their last input.
With always-ready streams, an instruction takes at most 2 cycles more than
its number of x samples, from `start` to `done`. The testbench allows up
to 3.

Writing `cfg_*` and pulsing `start` begins an instruction. `done` pulses
once all x samples are consumed and the output register has drained. The
result is in memory when the z write port's `busy` flag drops.

## Memory controller

`mpmc` has six ports. Each is set up with a base address, a length in words
and a direction, and then runs on its own:

| port | direction | use |
|------|-----------|-----|
| 0 | read | VALU x |
| 1 | read | VALU y |
| 2 | write | VALU z |
| 3 | read/write | processor memory I/O (`p_*[0]`) |
| 4 | read/write | video manager (`p_*[1]`) |
| 5 | read/write | display manager (`p_*[2]`) |

Every port has an 8-word FIFO.

* A read port asks for the memory while its FIFO has room for one more word,
  counting reads already in flight. It therefore never overflows, and it
  stops asking when its consumer stalls.
* A write port asks while its FIFO holds a word.

`prio_arbiter` grants the lowest-numbered requesting port each cycle. Fixed
priority cannot deadlock here: a stalled VALU stops draining its input
FIFOs, they fill, and their requests drop, which frees the memory for the
write port.

External memory protocol: one access per cycle, always accepted
(`mem_req`, `mem_we`, `mem_addr`, `mem_wdata`). Read data returns in
order, any number of cycles later, with `mem_rvalid`, and at most 8 reads
may be outstanding. A tag FIFO routes each returned word to its port.

Because there is one memory access per cycle, throughput is bounded by
memory traffic. A 512×384 convolution with 2×2 subsampling reads 196,608
words and writes 47,817. It finishes in 244,425 cycles, exactly their sum.

## Running a network on it

Every layer of a network becomes a sequence of VALU instructions. The
controlling processor issues them. Before each instruction it sets up the
memory ports and loads the coefficients it needs.

* **Convolution + subsampling layer.** For an output map fed by n input
  maps, the processor issues n `OP_CONV` instructions:
  * the first runs without y;
  * each later one reads the previous partial map as y;
  * only the last pools (`cfg_plog2` = 1).

  Pooling comes after the y addition, so the partial maps stay at full
  convolution size. Every pass rounds to Q8.8, so partial sums are
  Q8.8-saturated between passes.
* **Squashing.** One `OP_NONLIN` over each finished map.
* **Full connection.** Chained `OP_DOT` instructions with y. When the
  inputs lie in separate planes, each instruction uses n = 1 and covers one
  input map. When they are interleaved, each covers up to `N_MAX` input maps.

For the face-detection network on a 512×384 image, the layer sizes are:

| layer | maps | size |
|-------|------|------|
| C1 → S2 | 6 | 506×378 → 253×189 |
| C3 → S4 | 16 | 247×183 → 123×91 |
| C5 | 80 | 117×85 |
| F6 | 2 | 117×85 |
| F7 | 1 | 117×85 |

With every map connected to every map of the layer before, this takes 1,649
instructions and 60.0M cycles. Nearly all of that time is memory
traffic, since each cycle allows one memory access.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 7 | kernel grid (the face-detection network uses 7×7 throughout) |
| `W_MAX` | 640 | largest plane width (640×480 camera frames) |
| `N_MAX` | 16 | largest number of planes in one dot product |
| `NSEG` | 8 | squashing-function segments |
| `AW` | 24 | external memory word address width |

The plane width and height counters are 10 bits wide, so planes can be up
to 1023 lines high. Stream lengths are 22 bits.

## How this relates to the published design

Taken from the published design:
* the block structure (VALU, multi-port memory controller with priority
  manager, six units around the memory);
* the instruction list;
* the convolver's cell-and-delay-line structure, with (W−K)-step delays
  between rows and y added before pooling;
* pooling at the convolver output;
* the shift-and-add slope rule of the squashing function;
* one sample per clock cycle.

Choices made here, where the published design is silent:
* the Q8.8 format and 40-bit accumulators;
* average pooling with power-of-two sizes;
* the interleaved layout for the dot product;
* element-wise (not matrix) product and division;
* the square-root and division algorithms and the divide-by-zero rule;
* valid/ready streams, FIFO depths, the port map and fixed priority order;
* the memory protocol;
* the segment-table format and the "term off" shift code.

Known differences and gaps:
* The published hardware appears to convolve larger kernels in one pass
  (its timing is flat up to 9×9). Here K = 7 by default. Any K can be set
  by parameter, and larger kernels otherwise need several passes.
* The memory here moves one 16-bit word per cycle. The real board's memory
  width and clock are not known, so absolute frame rates cannot be
  compared.
* Not implemented: the 32-bit soft processor and its programs (control
  unit, kernel manager, post-processing, terminal/serial link), the video
  (camera) and display managers, and the external memory chip. The
  testbenches play the processor's role. `tb/ext_mem_model.sv` models the
  memory.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `cnp_pkg.sv` | types, opcodes, saturation |
| `conv2d.sv` | the convolver |
| `line_delay.sv` | one delay line of the convolver |
| `pool2d.sv` | pooling |
| `dot_unit.sv` | the dot-product unit |
| `nonlin.sv` | the squashing function |
| `valu_sqrt.sv`, `valu_mul.sv`, `valu_div.sv` | point-wise operations |
| `valu.sv` | the VALU |
| `sfifo.sv` | FIFO |
| `prio_arbiter.sv` | the priority manager |
| `mpmc.sv` | the memory controller |
| `cnp_top.sv` | top level |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:
* `tb_cnp_top.sv`: a multi-instruction program with background traffic on
  ports 3–5. It counts pooling, y accumulation, each instruction,
  input-starvation stalls, output back-pressure and arbitration conflicts,
  and fails if any of them never happens.
* `tb_cnp_full.sv`: the first face-detection layer, at default
  parameters, on a 512×384 image.
* `tb_face_net.sv`: the whole face-detection network, 512×384 input. It
  has 6, 16 and 80 convolution maps, then 2 and 1 fully connected maps, and
  runs as 1,649 VALU instructions. It takes 60M cycles and about 90 s of
  simulation, and every map is checked.
* `tb_conv640.sv`: 640×480 frames convolved with 1×1, 3×3, 5×5 and 7×7
  kernels. The time is 607,716 cycles for every kernel size, which is the
  memory bound.
* `ext_mem_model.sv`: the behavioural memory model.
* `cnp_ref.sv`: reference arithmetic.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cnp_pkg.sv tb/cnp_ref.sv rtl/*.sv tb/ext_mem_model.sv tb/tb_cnp_top.sv \
    --top-module tb_cnp_top -Mdir obj_top
./obj_top/Vtb_cnp_top
```

Replace `tb_cnp_top` with any other testbench name. The unit testbenches
need only `rtl/`. `tb_cnp_full` takes about five seconds. To change the
kernel grid or the maximum width, override `K` or `W_MAX` on `cnp_top`. The
`tb_conv2d`, `tb_pool2d` and `tb_valu` testbenches run at reduced sizes
(K = 3, width 16) to exercise edge cases such as W = K.
