# CNN segmentation accelerator with a direct deconvolution datapath

Segmentation networks such as U-Net and FCN shrink an image with
convolutions and pooling, then grow it back to full resolution with
deconvolution (transposed convolution) layers. A deconvolution is usually
computed by inserting zeros between the input pixels and running an ordinary
convolution, so most multiplications are by zero. This design computes it the
other way round: every input pixel is multiplied once by the whole k×k kernel,
and the resulting k×k tiles, placed s pixels apart in the output, are added
where they overlap. The work drops by about k²/s² against the zero-inserting
method, and the overlap is handled with a small register array and a
row-sized buffer instead of a large line buffer.

The RTL implements the accelerator of the article *"Optimizing CNN-based
Segmentation with Deeply Customized Convolutional and Deconvolutional
Architectures on FPGA"*. It has a convolution unit (CONV), a deconvolution
unit (DECONV), one input buffer shared by both, two DMA engines and an
AXI4-Lite register bridge. The default parameters are the article's 16-bit
design point for a Zynq ZC706:

- 64×64 blocks;
- CONV with 4 filters × 16 pixels in parallel;
- DECONV with 16 parallel 2×2 kernels;
- an input buffer for 128 channels.

A host processor sequences the network one layer at a time.

## Contents

| file | what it is |
|---|---|
| `rtl/cnn_pkg.sv` | layer descriptor struct, register map, fixed-point `quantize` |
| `rtl/deconv_kernel.sv` | one deconvolution pipeline (multipliers, overlap registers, partial result buffer) |
| `rtl/coef_buffer.sv` | k×k coefficient FIFO that hands out one kernel column per cycle |
| `rtl/output_buffer.sv` | ping-pong accumulating output buffer (channel sum) |
| `rtl/deconv_module.sv` | DECONV unit: loops, parallel kernels, border removal, write-back |
| `rtl/conv_module.sv` | CONV unit: 3×3 convolution, 2×2 max pooling and crop at write-back |
| `rtl/shared_input_buffer.sv` | input block storage shared by both units |
| `rtl/dma.sv` | block load, coefficient stream and result write on one memory port |
| `rtl/axil_bridge.sv` | AXI4-Lite slave with the layer registers |
| `rtl/cnn_accel_top.sv` | top level and layer sequencer |
| `tb/` | one self-checking testbench per module, plus two end-to-end tests, an FCN workload test, a reference-model package and a memory model |

## How a deconvolution is computed

Notation: the input block is h×w, the kernel k×k, the stride s and the
padding p. The full output is `H_O = s·(h−1)+k` by `W_O = s·(w−1)+k`. Padding
means that p rows and columns are removed from each border of this full
output. Input pixel x(r,c) adds `x·K[i][j]` to output `(s·r+i, s·c+j)`.

### One pipeline (`deconv_kernel`)

A pixel is processed in k consecutive *steps*, one kernel column j = 0…k−1
per step. The coefficient column is read from the coefficient buffer and
latched with the pixel. k multipliers form the products `x·K[i][j]`, one per
kernel row i. Two kinds of overlap remain.

**Column overlap (inside a row).** The tile of pixel c+1 starts s columns to
the right of the tile of pixel c. Its columns j < k−s land on columns
j+s of pixel c. Each kernel row therefore has a shift register of k−s stages
that advances every step. The adder of row i adds the product to the value
that left the shift register. That value is pixel c's column j+s, pushed k−s
steps earlier. The adder's sum, not the raw product, is what enters the
shift register. So when k > 2s a column covered by three tiles is summed
fully. For k ≤ 2s, which covers every common layer, this is the same as
shifting the products.

**Row overlap (between rows).** Rows i ≥ s of a tile are overlapped by the
tiles of the next input row. They are not final, so they go into the
*partial result buffer*: k−s rows, each one output row wide. When the next
input row is processed, its rows i < k−s read that buffer and add it.

**When a value is final.** A value leaves the pipeline when nothing can be
added to it any more. In the column direction that means j < s, or any
column of the last pixel of a row. In the row direction it means i < s, or
any row of the last input row. Each output is therefore emitted exactly
once, already summed over the overlap. `out_valid[i]` flags row slot i.
`out_row0 = s·r` and `out_colx = s·c+j` give the position.

Example, k = 4, s = 2, for one input row:

```
step   pixel col j   multiplier row i adds             emitted (rows i<s)
 t0    c=0   0        K[i][0]                          col 0
 t1    c=0   1        K[i][1]                          col 1
 t2    c=0   2        K[i][2]  -> shift register       -
 t3    c=0   3        K[i][3]  -> shift register       -
 t4    c=1   0        K[i][0] + (c=0, col 2)            col 2
 t5    c=1   1        K[i][1] + (c=0, col 3)            col 3
 ...
```

The pipeline is two register stages deep: the coefficient/pixel registers and
the output register. k and s are run-time inputs with `1 ≤ s ≤ k ≤ KMAX`.
The kernel takes one step per clock without stalls.

### Coefficient buffer

`coef_buffer` packs the coefficient stream into k-word columns. Columns come
in column-major order: column 0 rows 0…k−1, then column 1, and so on. When
all k columns are held, `full` rises. Each `pop` moves the head column to the
tail, so the same kernel is replayed for every pixel of the channel. It is
cleared before the next (filter, channel) kernel is loaded.

### The DECONV unit (`deconv_module`)

The unit runs the layer loops with filters outside and channels inside. For
each (filter, channel) pair it does three things:

1. Clear the coefficient buffer and load k² words. There is no overlap with
   computation, so this costs k² cycles per pair.
2. Walk the input block and feed the pipelines, k steps per pixel.
3. Add the pipeline outputs into the output buffer (the ACC stage). The
   first channel writes and later channels add.

A finished filter swaps the ping-pong output buffer. Its result is then read
out while the next filter is computed. The read-out covers rows and columns
`p … H_O−p−1`, which is where the padding border is removed. Each value is
quantized and sent one word per cycle.

**Parallel pipelines.** PV pipelines share the coefficient column and take PV
neighbouring input rows of a row group. This is only correct when
neighbouring rows do not overlap, that is when k = s, which is every U-Net
layer. For s < k the row overlap would cross pipelines, so a single pipeline
runs and the others idle. Filter parallelism is 1.

Cycle count per layer, about:

```
nf · nc · ( ceil(h/nl) · w · k  +  k² + 4 )   with nl = PV if k == s else 1
```

The write-back of a filter runs alongside the next filter. The last one is
added at the end, at about `(H_O−2p)·(W_O−2p)` cycles.

## The CONV unit (`conv_module`)

This unit computes a 3×3, stride-1 convolution with zero padding of 1, so the
output is the same size as the input. It handles PF filters and PV
consecutive output pixels of a row per clock:

- Each cycle it reads a 3 × (PV+2) window from the input buffer (54 read
  ports at the defaults) and forms PV·PF dot products of 9 terms.
- The results are added into PF ping-pong output buffers, one per parallel
  filter.
- Coefficients of a filter group and channel are loaded one word per cycle
  before the channel is swept. Per filter the order is kernel row, then
  kernel column. Groups are outermost and channels inner.

Cycle count, about `ceil(nf/PF) · nc · (h · ceil(w/PV) + 9·PF + 2)`.

Pooling and crop are applied at write-back, when the finished maps are read
out of the output buffer. Per filter the result stream holds:

| pool_en | crop_en | stream per filter |
|---|---|---|
| 0 | 0 | h×w map |
| 0 | 1 | map without `crop` pixels on each border |
| 1 | 0 | (h/2)×(w/2) max-pooled map |
| 1 | 1 | cropped map, then the pooled map |

The last row lets one pass produce both the skip-connection copy and the
down-sampled input of the next stage. For the padded U-Net the copy is not
cropped: set crop to 0.

## Data movement

**Shared input buffer.** CONV and DECONV never run at the same time, so they
share one input buffer. It holds `NCMAX·BH·BW` words, 524,288 16-bit words
at the defaults. The layout is channel-major, then row-major:
`addr = (c·h + y)·w + x`. It has one write port four words wide (one 64-bit
memory beat) and many read ports with a latency of one cycle. In a real
device it would be banked into block RAMs. Here it is a plain array with
parallel reads.

**DMA.** Each unit has its own DMA, on its own memory port: `m0_*` for CONV
and `m1_*` for DECONV. A DMA has three channels on that port:

- **load** copies `nc·h·w` words from `in_base` into the input buffer before
  the layer starts;
- **coef** streams words from `coef_base` on demand;
- **result** packs the output words four per beat and writes them from
  `out_base` onward. A final partial beat is written on flush.

Writes take priority over the load, and the load over coefficients. The
memory port protocol is:

- Requests use valid/ready and carry `we`, a beat address, write data and a
  2-bit id.
- Read responses come back in request order with their id, one beat per
  cycle, and cannot be refused.
- Writes are not acknowledged.

A small adapter maps this onto AXI or a memory controller.

**Memory layout.** Addresses are beat addresses of 64 bits, and words are
packed little-end first within a beat. Each stream starts at its base
address:

- The input block is channel-major.
- Coefficients are laid out per unit as described above:
  - DECONV: filter, then channel, then column-major k×k.
  - CONV: filter group, then channel, then filter in the group, then 3×3
    row-major.
- Outputs are written filter after filter, in the stream format above.

## Programming a layer

Registers (byte offsets, 32-bit):

| offset | name | fields |
|---|---|---|
| 0x00 | CTRL | [0] start (write 1) |
| 0x04 | STATUS | [0] busy, [1] done (sticky, cleared by start) |
| 0x08 | MODE | [0] 0 = CONV, 1 = DECONV; [1] pool_en; [2] crop_en; [3] relu_en |
| 0x0C | NC_NF | [15:0] input channels, [31:16] filters |
| 0x10 | H_W | [15:0] block height, [31:16] block width |
| 0x14 | KSP | [7:0] k, [15:8] s, [23:16] p, [31:24] crop |
| 0x18 | IN_BASE | beat address of the input block |
| 0x1C | COEF_BASE | beat address of the coefficients |
| 0x20 | OUT_BASE | beat address of the results |
| 0x24 | CYCLES | clock cycles taken by the last layer |

A layer runs in three phases after start:

1. LOAD copies the block into the input buffer.
2. RUN computes all filters, with the write-back overlapped.
3. FLUSH writes the last beat.

Then `done` is set and `irq` pulses for one cycle. Configuration registers
must not change while busy. Limits, checked by assertions:

- `h ≤ BH` and `w ≤ BW`;
- `nc·h·w ≤ NCMAX·BH·BW` (the block fits the input buffer);
- `k ≤ KMAX` for DECONV;
- h and w even when pooling.

Larger maps are cut into blocks by the host. Each block is treated as if it
were surrounded by zeros. Where a 3×3 convolution must see its neighbours,
the host loads blocks that overlap by one pixel and discards the outermost
results. For k = s deconvolution no overlap is needed.

**Fixed point.** Words are signed DW-bit fixed point. Products and channel
sums are kept at `2·DW+8` bits. At write-back the sum is shifted right
arithmetically by FRAC (default 8), clamped at zero if relu_en, and
saturated to DW bits. Coefficients therefore carry FRAC fraction bits, and
the result of a layer has the same format as its input.

## Parameters of `cnn_accel_top`

| parameter | default | meaning | origin |
|---|---|---|---|
| DW | 16 | word width | article, 16-bit final design |
| FRAC | 8 | fraction bits dropped at write-back | this design |
| BH, BW | 64 | block size | article |
| NCMAX | 128 | channels held in the input buffer | largest channel count of the optimized U-Net |
| PV_CONV, PF_CONV | 16, 4 | CONV pixel / filter parallelism | article |
| PV_DECONV | 16 | DECONV parallel kernels | article |
| KMAX | 2 | largest deconvolution kernel | U-Net 2×2 deconvolution |

Other design points of the article are parameter sets of the same RTL:

- 24-bit: `DW=24, PV_CONV=8`;
- 32-bit: `DW=32, BH=BW=32, PF_CONV=2, PV_CONV=8, PV_DECONV=8`;
- FCN deconvolutions (kernel 16, stride 8): `KMAX=16` (simulated, see `tb_fcn_deconv`).

## Where this RTL departs from the article

- **Write-back rate.** Results leave each unit at one word per clock. Early
  U-Net layers have few channels, and there the read-out is longer than the
  computation it overlaps. An estimate for the optimized U-Net on a 512×512
  image at 200 MHz is 52 ms of computation and about 155 ms in total. The
  article measures 58 ms. A write-back as wide as the memory beat (four
  words) would shorten the gap; it is not built.
- **Deconvolution rate.** A pipeline takes one kernel column per clock, so
  an input pixel costs k clocks. The article's description of the kernel
  gives the same rate, but its performance model counts one input pixel per
  clock per pipeline.
- **Parallel kernels with overlap.** PV kernels are only used when k = s.
  FCN-style layers (s < k) run on one kernel.
- **Splitting one large kernel.** The article reuses one large kernel as
  several small ones, for example a 16×16 kernel as four 4×4 kernels, or the
  2×2 kernel as two datapaths for the final 1×1 convolution. This is not
  built. A 1×1 convolution is a deconvolution with k = s = 1, so the final
  layer still runs on the DECONV unit, on PV kernels with one multiplier
  each.
- **Channel limit.** The input buffer bounds channels times block area, not
  the channel count alone. A layer with more channels than NCMAX runs on
  smaller blocks. For example, the 1024-channel 28×28 deconvolution of the
  original U-Net runs as four 14×14 blocks (1024·14·14 ≤ 128·64·64).
- **Left to the host.** The register map, the memory protocol, the stream
  formats, the fixed-point scaling and block halos are choices of this RTL.
  The article leaves them open. The CONV unit's inner structure is likewise
  the simplest one that gives the required throughput. The article bases its
  convolution engine on earlier work and does not detail it.
- **Not in the RTL.** The processor, interconnects and DDR memory are outside
  the RTL. Their connections are top-level ports.

## Simulation and verification

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M`, has a cycle watchdog, and checks cycle
counts against the budgets above. Expected values come from
`tb/tb_ref_pkg.sv`, which computes convolution and deconvolution directly
from their definitions. It scatters each input pixel times the kernel into
the full output, which is a different method from the RTL's. External
memory is modelled by `tb/ddr_model.sv`, with a random ready signal and a
fixed read latency.

| testbench | what it runs |
|---|---|
| `tb_deconv_kernel` | k,s = (2,2), (4,2), (3,2), (4,1), (4,4) at KMAX=4 against scattered sums |
| `tb_deconv_module` | several layers incl. padding removal, multi-channel accumulation and k = s = 1 |
| `tb_conv_module` | conv with every pool/crop/relu combination |
| `tb_coef_buffer`, `tb_output_buffer`, `tb_shared_input_buffer`, `tb_dma`, `tb_axil_bridge` | unit tests |
| `tb_cnn_accel_top` | small parameters, KMAX=4: a mini U-Net and extra layers; counts pooling, crop, ReLU, mode switches, parallel and overlapping deconvolution, write-back overlap, memory and result stalls, partial last beats |
| `tb_fcn_deconv` | workload: the three FCN-8s deconvolutions, (4,2) 1→4, (4,2) 4→10 and (16,8) 10→88 with 21 channels and 21 filters, on the DECONV unit built with KMAX=16 |
| `tb_cnn_accel_full` | default parameters: five layers, up to conv 128→128 at 32×32 and deconv 128→64, plus the final 1×1 layer (8→1 at 64×64) on the DECONV unit |

To run one with Verilator (5.x):

```
verilator --binary --timing -Irtl -Itb --top-module tb_cnn_accel_top \
    rtl/cnn_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/ddr_model.sv tb/tb_cnn_accel_top.sv
./obj_dir/Vtb_cnn_accel_top
```

Unit testbenches need only their module, plus `cnn_pkg.sv` and
`tb_ref_pkg.sv` where they use them. The full-size test runs for about a
quarter of a minute of simulation after a compile of a few minutes. A
deliberately broken copy of each module was used to confirm that each
testbench detects errors.
