# FXP8 GAN generator accelerator with bit-combined PEs and remapped transposed convolution

This is synthesizable SystemVerilog for an inference accelerator aimed at the
generator network of an image-to-image GAN (StarGAN-style style transfer) on a
mobile-class FPGA. Two ideas carry the design:

1. **Two 8-bit products per multiplier.** Weights and activations are 8-bit
   fixed point, with a fractional length chosen per layer (layer-wise dynamic
   fixed point). Two weights of different output channels are packed into one
   wide multiplier operand. One multiplication by an activation then gives
   both products, after a one-bit sign correction.
2. **Transposed convolution without the inserted zeros.** A stride-2
   transposed convolution is normally computed by inserting zeros between input
   pixels and running a convolution, wasting most multiplications. Here the
   nine taps of a 3x3 kernel are split among the four output pixels they feed.
   One pass over a 2x2 input neighbourhood then produces four output pixels.
   It runs on the same PE array as an ordinary convolution.

Default configuration: 8 convolution cores, each with a 16 x 9 array of
bit-combined PEs (1,152 multipliers). Each core covers 256 input channels in
16 cycles per window position. One 32-bit AXI master serves all external
memory traffic.

## Block structure

```
             32-bit AXI  <->  axi_dma  <->  IMEM (2 banks) / weight buffers / bias-BN regs / OMEM
                                              |
   top_ctrl --(prefetch, hold, shift)--> asr: 3x3 window of 256-channel pixels
                                              |  (broadcast)
              +-------------------------------+---------------------------+
        db_conv_core 0                  db_conv_core 1      ...     db_conv_core 7
        conv_ctrl -> weight_buffer (2 kernels)
                  -> bcpe_array 16x9 (bcpe) -> dae (accumulate, PISO, bias/BN/ReLU/descale)
              +-------------------------------+---------------------------+
                                              v
                                  OMEM (FXP8 results only)
```

| Module | Role |
|---|---|
| `gan_pkg` | mode enum, layer configuration struct, performance counters, TConv phase function |
| `bcpe` | packed two-weight multiplier with overflow (borrow) correction |
| `bcpe_array` | ROWS x 9 PEs, per-tap column sums over the input channels |
| `weight_buffer` | the two 3x3xCIN kernels of one core |
| `dae` | dual-mode aggregation engine: Conv or TConv accumulation paths, serial post processing |
| `conv_ctrl` | per-core slice sequencing and start/stall rule |
| `db_conv_core` | one core: controller, weight buffer, PE array, DAE |
| `asr` | activation shared register: prefetch, hold and window registers |
| `imem` | double-buffered input map memory |
| `omem` | output map memory |
| `axi_dma` | 32-bit AXI master moving words between external and on-chip memory |
| `top_ctrl` | layer sequencer |
| `gan_accel_top` | the whole accelerator |

## Bit-combined multiplication (`bcpe`)

With signed 8-bit `W0`, `W1` and `A`:

    (W0 * 2^17 + W1) * A = (A*W0) * 2^17 + A*W1

`A*W1` fits in 16 signed bits, so bits 15:0 of the product are `A*W1`
exactly. Bits 32:17 would be `A*W0`, except that a negative `A*W1` borrows
one from them. The "overflow estimator" predicts the borrow from the inputs.
The borrow occurs exactly when `A` and `W1` have different signs and neither
is zero. In that case it adds one back to the upper field. The check covers
every activation against every lower weight.

The packed operand needs 26 bits, not 25. `W0 = -128` with a negative `W1`
gives a value below -2^24. A 26 x 8 multiply fits one DSP slice.

## Transposed convolution by data remapping

The 3x3 stride-2 transposed convolution computed here is:

- insert a zero after every input pixel in both directions: `z(2i, 2j) = x(i, j)`, zeros elsewhere;
- convolve with the 3x3 kernel `w(u, v)` and padding 1: `y(m, n) = sum z(m+u-1, n+v-1) * w(u, v)`.

The output is 2H x 2W. Only taps that land on an even `z` position
contribute, so each output phase uses a fixed subset of taps and inputs:

| output | taps (u, v) | inputs |
|---|---|---|
| y(2i, 2j) | (1,1) | x(i,j) |
| y(2i, 2j+1) | (1,0), (1,2) | x(i,j), x(i,j+1) |
| y(2i+1, 2j) | (0,1), (2,1) | x(i,j), x(i+1,j) |
| y(2i+1, 2j+1) | (0,0), (0,2), (2,0), (2,2) | x(i,j), x(i,j+1), x(i+1,j), x(i+1,j+1) |

Each tap is used exactly once across the four outputs. The needed input is
`x(i + [u==2], j + [v==2])`, so the window for TConv is:

    rows    x(i),  x(i),  x(i+1)
    columns x(j),  x(j),  x(j+1)

This is the 2x2 neighbourhood upsampled by two (each pixel repeated) and
sampled with stride 2. Two parts of the design cooperate:

- **The ASR builds the window.** A prefetch into row 0 also writes row 1
  (row upscaling). In TConv mode a shift copies the old column 2 into
  columns 0 and 1 and loads the prefetched column into column 2 (column
  upscaling plus a stride-2 slide).
- **The DAE splits the accumulation.** In TConv mode it keeps four
  accumulators per kernel and adds each tap's column sum to the accumulator
  of its phase, `phase = {u != 1, v != 1}` (`gan_pkg::tconv_phase`).

A pass costs the same cycles as a convolution pass but yields four outputs
per kernel. The serial output queue then holds 8 values per core instead of 2.

## The activation shared register and the window schedule

Every ASR register holds one pixel: all CIN_MAX channels of one (row,
column). There are 3 prefetch, 3 hold and 9 window registers. All cores read
the same window. Core c works on output channels `16g + 2c` and `16g + 2c + 1`
of group g, so one pass produces 16 output channels.

`top_ctrl` fetches one column at a time. F(x) means: read input column x for
the rows the window needs, one pixel per cycle. Pixels outside the map are
not read; zeros are written instead, which is the padding. For output row r
and window position k, the schedule is:

| mode | rows of F(x) | row start | per window position k |
|---|---|---|---|
| stride 1 | r-1, r, r+1 | F(-1) SHIFT F(0) SHIFT | F(k+1) SHIFT START |
| stride 2 | 2r-1, 2r, 2r+1 | F(-1) SHIFT | F(2k) HOLD F(2k+1) SHIFT START |
| TConv | r, r+1 (row r repeated) | F(0) SHIFT | F(k+1) SHIFT START |

The shifts are:

- stride 1: col0 <- col1 <- col2 <- prefetch;
- stride 2: col0 <- col2, col1 <- hold, col2 <- prefetch;
- TConv: col0 and col1 <- col2, col2 <- prefetch.

**Timing.** The fetches for position k+1 run while the cores compute
position k. SHIFT waits until the cores have sampled the last channel slice
of the window. A core samples one 16-channel slice per cycle, so a pass
lasts `cin_groups` cycles (16 for 256 channels).

Preparing a window takes 6 cycles for stride 1, 11 for stride 2 and 5 for
TConv. Each of these counts includes a flush cycle for the IMEM read latency
and the shift. With 16-cycle passes the preparation is hidden: passes within
an output row start exactly 16 cycles apart (checked by the default-size
testbench). With few input channels the preparation dominates. Each new
output row also adds its row-start fetches.

## Per-core pipeline and the aggregation engine

A core has four pipeline steps:

1. The slice of step *g* is issued. The core samples that slice of the
   window and reads weight-buffer entry *g*.
2. The PE array multiplies and registers the 9 per-tap column sums of each
   kernel.
3. The DAE accumulates. It clears at the first slice. At the last slice it
   loads the finished sums (2 for Conv, 8 for TConv) into a parallel-in
   serial-out (PISO) register.
4. One value per cycle leaves the PISO through the post-processing stage,
   which is registered.

The first result appears `cin_groups + 3` cycles after start.

The post-processing steps, in order:

- `v = acc + bias` (bias in accumulator units, 16-bit signed);
- `v = (v * bn_mul) >>> 8` (batch norm folded into a signed Q8.8 multiplier);
- ReLU if enabled;
- `v = (v + 2^(s-1)) >>> s` with `s = descale_sh`: round to the next layer's
  fractional length. Typically `s = FL_act + FL_w - FL_next`;
- saturate to [-128, 127].

Only descaled 8-bit values reach OMEM. No partial sums leave a core.

**Stall rule.** A new pass may start only if the PISO will have drained by
the time that pass ends (`conv_ctrl`). With 16-cycle passes this never
stalls. It does stall with short TConv passes, where 8 values per pass must
drain.

## Running a layer

Set `cfg` (`gan_pkg::layer_cfg_t`), pulse `start`, then wait for `done`. The
configuration fields are:

- `mode`;
- the input size `in_h`, `in_w`;
- `cin_groups`: input channels / 16;
- `cout_groups`: output channels / 16;
- `descale_sh` and `relu_en`;
- five byte addresses in external memory;
- the double-buffer controls `load_input`, `prefetch_next`, `next_pixels`,
  `next_words`.

The controller runs a layer in this order:

1. It loads the input map into the idle IMEM bank, then swaps the banks.
   With `load_input = 0` the load is skipped. The swap then activates a bank
   filled while the previous layer ran (`prefetch_next` = 1 on that layer).
2. For each group of 16 output channels:
   - it loads both kernels of every core (8 DMA jobs);
   - it loads the 16 `{bn_mul, bias}` words;
   - it scans all output positions;
   - it waits for the cores to drain.
3. It stores OMEM to external memory.

The next-layer prefetch runs on the AXI bus while the first group's scan
computes.

External memory layout (32-bit words; channel 4w of a pixel is in bits 7:0 of
word w):

| data | layout |
|---|---|
| input map | pixel-major (row, then column), `cin_groups*4` words per pixel |
| kernels | blocks in order `g*8 + c` (group, core); each block is `cin_groups` entries of 72 words. Byte `(k*9 + t)*16 + r` of an entry is the weight of kernel k (0/1), tap t = 3u+v, channel 16e + r |
| bias / BN | per group 16 words; word `2c + k` = `{bn_mul[15:0], bias[15:0]}` |
| output map | pixel-major, `cout_groups*4` words per pixel |

Limits at the default sizes:

- at most 1,024 input pixels per IMEM bank;
- at most 1,024 output pixels;
- 256 input and 256 output channels;
- 3x3 kernels only, padding 1.

Bigger maps must be split into bands by the host, with halo rows.

## Performance monitoring

`perf` counts:

- window passes;
- cycles the next window waited for the cores;
- cycles the cores stalled on output drain;
- padding fetches;
- IMEM bank swaps;
- overflow-estimator corrections.

The counters are cleared only by reset and keep counting across layers. The
correction count is 32 bits wide and wraps after about 4 x 10^9 events.

## Where this departs from, or goes beyond, the published design

- The overall structure follows the published design: 8 cores, 16x9 bit-combined
  PE arrays, packed weights with sign correction, a window register with
  prefetch/hold/window sets, dual-mode accumulation with a PISO, and
  double-buffered input memory.
- The following are this implementation's own choices:
  - memory depths;
  - the external layout;
  - the configuration interface;
  - the controller's schedule and stall rule;
  - the numeric formats of bias and batch norm, and the rounding.
- The multiplier operand is 26 bits wide (see above).
- The AXI master does single-beat transfers with one transaction outstanding.
  This is correct, but it uses only about a third of the bus bandwidth. At
  the default size, loading a 16-channel group's kernels (9,216 words) costs
  far more cycles than computing a small map. Bursts and overlapping kernel
  loads with computation are not implemented.
- Weight buffers are single-buffered. Kernels are loaded between
  output-channel groups.
- The per-layer fractional lengths come from an offline calibration. The
  hardware only applies the resulting shift.
- No timing closure or power figures are claimed. The RTL has not been
  through FPGA implementation.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gan_pkg.sv tb/tb_dae.sv --top-module tb_dae
./obj_dir/Vtb_dae
```

| Testbench | What it covers |
|---|---|
| `tb_bcpe` | all 65,536 (A, W1) pairs with random W0, plus corners |
| `tb_bcpe_array` | random operands, column sums and correction count |
| `tb_weight_buffer`, `tb_imem`, `tb_omem` | layout, latency, bank swap, per-core byte writes |
| `tb_dae` | random passes in both modes against a reference post-processing model |
| `tb_conv_ctrl` | slice sequence, window release, stall rule |
| `tb_asr` | all three shift modes and TConv upscaling against a model |
| `tb_axi_dma` | read and write jobs against an AXI memory model with random delays |
| `tb_db_conv_core` | full core: Conv and TConv passes, latency, stall |
| `tb_gan_accel_top` | 2 cores, 4 PE rows, 32 channels, see below |
| `tb_gan_full` | every default parameter, see below |
| `tb_gan_workloads` | generator-sized layers at the default size, see below |

`tb_gan_accel_top` runs four layers end to end, in about 10k cycles:

1. a stride-1 convolution that prefetches the next input;
2. a stride-2 convolution on that prefetched input;
3. a TConv with one channel slice, which forces stalls;
4. a TConv with all slices.

`tb_gan_full` runs the default configuration, with no parameter overrides:

1. a 3x4 stride-1 convolution with 256 input channels and prefetch;
2. a 3x3 stride-2 convolution on the prefetched input;
3. a 2x3 TConv, with 256 input channels.

It takes about 120k cycles, a few seconds.

`tb_gan_workloads` runs layers of the StarGAN generator's shapes on the
default-size accelerator. The first is one complete residual-block layer: a
3x3 stride-1 convolution from 256 to 256 channels on a 32x32 map, with ReLU.
All 262,144 outputs are checked. The layer takes 1,514,229 cycles (about 15 ms at 100 MHz). Only 262,144 of
them are window passes (16 groups x 1,024 positions x 16 cycles). The rest
is the single-beat AXI bus loading 65,536 input words and 147,456 kernel
words, which is not overlapped with computation.

The other two layers are bands of layers that do not fit whole:

- 16 rows x 64 columns of a stride-2 down-sampling layer, 64 to 128
  channels;
- 8 rows x 32 columns of an up-sampling TConv, 256 to 128 channels,
  giving a 16 x 64 output band.

The whole run takes about 50 seconds, plus about 30 to build.

The three end-to-end testbenches use `tb/gan_host.sv`, which contains:

- the AXI memory model, `tb/axi_mem_model.sv`;
- random data generation in the external layout;
- a direct reference convolution. For TConv the reference is built from the
  zero-insertion definition, not from the phase table.

Each of them:

- compares every output byte with the reference;
- checks that passes within a row start exactly `cin_groups` cycles apart
  when preparation and drain are hidden;
- fails if any of these never occurred: stride 1, stride 2, TConv,
  full-rate passes, prefetched input, bank swap, padding, window waiting
  for cores, overflow correction, or (reduced size only) output-drain stall.
  The generator-sized run does not use prefetch, so it skips the
  prefetch and drain-stall counts.
