# A scalable on-chip accelerator for quantized, width-scaled CNNs

Low-bit networks lose accuracy, and making them wider wins it back. So the
quantization level `q` (bits per weight and activation) and the width
factor `s` (every layer has `s` times the channels of a base network) can be
traded against each other. This accelerator is built so that both knobs map
directly onto hardware. It is a grid of `P x M` q-bit multiply-accumulate
units: `P` processing engines (PEs) with `M` multipliers each. Every weight
and every intermediate feature map (fmap) stays in on-chip block RAM, so an
inference never touches external memory.

The energy-optimal size is `P = M = 64s`, which is the narrowest layer's
filter and channel count. At that size the weight sub-banks and fmap
memories keep a constant depth of 1024 words as `s` changes; only their
width `M*q` grows. The clock count per inference stays the same too: the
work grows as `s^2` and so does the multiplier count.

The RTL defaults to `q = 3`, `P = M = 32`, which is the VGG-like CIFAR-10/SVHN
network at `s = 1/2`. A complete inference of that network takes 46,871
clocks (0.33 ms at 143 MHz, about 3,000 frames/s). It is simulated bit-exactly
against a reference model in `tb/tb_qsnas_vgg.sv`.

## Block structure

```
 pix_* (24 pins, 1 RGB pixel/clk)
        |
  qsnas_input_loader ---> qsnas_fmap_pingpong (bank 0 | bank 1, M*q x 1024 each)
                              | read word (bank sel)          ^ write word (bank !sel)
                              v                               |
        +---------- broadcast to all PEs ---------+           |
        |                                          |           |
   qsnas_pe #0  ...  qsnas_pe #P-1   (lock step)   |           |
     weight sub-bank (qsnas_sram, M*q x 1024)      |           |
     M x qsnas_mul_lane -> qsnas_adder_tree -> accumulator     |
     qsnas_bn_quant -> qsnas_maxpool                           |
     qsnas_dw_window (depthwise patch)                         |
        |  q-bit output of PE p = lane p of the output word ---+
        +--> res_* (raw scores of the classification layer)

  qsnas_controller: layer table, address generation, tags, bank swap
```

| file | role |
|---|---|
| `rtl/qsnas_pkg.sv` | layer types, layer descriptor, issue tag |
| `rtl/qsnas_top.sv` | the accelerator `HW<P,M>` |
| `rtl/qsnas_controller.sv` | layer sequencer and address generator |
| `rtl/qsnas_pe.sv` | processing engine |
| `rtl/qsnas_mul_lane.sv` | q-bit multiplier with first-layer shift |
| `rtl/qsnas_adder_tree.sv` | pipelined adder tree |
| `rtl/qsnas_bn_quant.sv` | batch norm and quantizing ReLU |
| `rtl/qsnas_maxpool.sv` | 2x2 max-pool by bubble pass |
| `rtl/qsnas_dw_window.sv` | KxK depthwise patch buffer |
| `rtl/qsnas_fmap_pingpong.sv` | the two swapping fmap memories |
| `rtl/qsnas_input_loader.sv` | 24-pin image loader |
| `rtl/qsnas_sram.sv` | block RAM model (1W1R, registered read) |

## Data layout

Most of what is hard to understand in this design is in how data is laid
out. The controller's address arithmetic and the host's loading code must
both follow these rules.

**Fmap words.** A fmap word is `M` lanes of `q` bits. One pixel with `C`
channels takes `CG = ceil(C/M)` consecutive words. Word `pix*CG + g` holds
channels `g*M ... g*M+M-1` in lanes 0..M-1. Pixels are in raster order. A
layer with `N` filters writes `NG = ceil(N/P)` words per output pixel. With
`P == M`, PE `p` of filter pass `ng` produces channel `ng*P + p` and writes
lane `p`, so the next layer reads the layout it expects without any
reordering. Lanes without a channel hold zeros.

**Input image.** The image is unsigned 8-bit RGB and is not quantized. Each
8-bit value is zero-extended to `NCH*q` bits, with `NCH = ceil(8/q)`, and
split into `NCH` chunks, LSB chunk first. Lane `c*NCH + j` of the pixel's word
holds chunk `j` of channel `c`. For `q = 3` that is 9 bits per value in lanes
0..8.

**Weight sub-banks.** PE `p` holds the filters `ng*P + p`. In a vanilla
CONV/FC layer starting at entry `w_base`, the weight word at
`w_base + ng*K*K*CG + (ky*K + kx)*CG + g` holds, in lane `i`, weight
`(filter ng*P+p, ky, kx, channel g*M+i)`. This is exactly the layout of the
fmap word it is multiplied with.
- **First layer:** the weight of channel `c` is copied into all `NCH` chunk
  lanes of that channel.
- **Depthwise layer:** word `w_base + g` of PE `p` holds the `K*K` weights of
  channel `g*M + p` in lanes `ky*K + kx`.

**Batch-norm parameters.** Each PE keeps its own table of `(alpha, zeta)`
pairs. Entry `bn_base + ng` (depthwise: `bn_base + g`) belongs to the
channel that PE computes in that pass.

For the VGG network at `s = 1/2` the nine layers use
9+9+18+36+72+144+512+64+8 = 872 of the 1024 weight entries per PE. The
largest fmap (32x32 pixels x 32 channels) fills exactly the 1024 fmap words.

## Layer types and schedule

The same pipeline runs four kinds of layer. The controller issues one
fmap read and one weight read per clock, always the same weight address in
all PEs.

| layer | what one clock does per PE | clocks per layer | ops/clock |
|---|---|---|---|
| vanilla CONV / FC | `M`-lane dot product of one fmap word and one weight word | `NG*OH*OW*K*K*CG` | `2*min(N,P)*min(C,M)` |
| first layer | `C` (=3) 8-bit x q-bit products, as `C*NCH` shifted q x q products | `NG*OH*OW*K*K` | `2*min(N,P)*C` |
| depthwise KxK | one pixel into the patch buffer; every K clocks a `K*K` product | `CG*OH*(W+2*pad)*K` | about `2*min(C,P)*K` |
| global average pool | adds its own channel of one pixel, multipliers bypassed | `NG*H*W` | `min(C,P)` additions |

- **CONV / FC.** Loop order, outermost first: filter group `ng`, output
  pixel, `ky`, `kx`, channel group `g`. The accumulator clears on the first
  term and outputs on the last, so consecutive outputs follow each other
  with no bubble. Padding positions are read as zero. An FC layer is a
  convolution whose kernel covers its whole input, with `pad = 0`. For
  example, the 4x4x128 fmap feeding the first FC layer is read as a 4x4
  kernel, and later FC layers are 1x1 convolutions of a 1x1 fmap.
- **Max-pool.** When a layer is pooled, the output pixels are visited 2x2
  patch by patch, so each PE's pool unit receives the four values of a
  patch one after the other. The unit holds them in a 4-entry buffer and
  runs three compare-and-swap steps, one per clock, on the pairs (0,1),
  (1,2) and (2,3). The largest value ends up in the last entry.
- **First layer.** Lane `i` shifts its product left by `q*(i mod NCH)`. The
  adder tree therefore sums full 8-bit x q-bit products, with no extra
  hardware beyond the shifter.
- **Depthwise.** Each PE takes its own lane of the fmap word (its
  channel). For each output row and each input column, `K` clocks read the
  `K` pixels of that column into `qsnas_dw_window`. When a column is
  complete, the `K x K` window shifts left by one column. From the `K`-th
  column of a row onwards, every new column completes a patch, which is
  multiplied with the weight word. The first `K-1` columns of each row only
  fill the window. This costs `(K-1)*K` clocks per row beyond the ideal
  `K` clocks per output.
- **Global average pool.** This runs as a "valid" CONV whose kernel covers
  the whole input. Filter group `ng` reads channel group `ng` of each pixel.
  PE `p` feeds lane `p` of the word straight into its adder tree, without
  the multipliers, so the accumulator sums channel `ng*P + p` over all
  pixels. Batch norm then scales the sum to the mean and quantizes it.
- **Stride 2.** A CONV or first layer at stride 2 reads input pixel
  `(2*oy + ky - pad, 2*ox + kx - pad)` for output `(oy, ox)`. A depthwise
  layer at stride 2 reads only input rows `2*oy .. 2*oy+K-1`, and still
  reads every column. Only every second complete patch fires, so the cost
  in clocks is the same as at stride 1 for half the output rows.

After the last read of a layer, the controller waits a fixed `DRAIN` clocks
(`16 + clog2(M)`) for the pipeline to empty. It then flips the fmap bank
select and starts the next layer. Each layer costs its reads plus
`DRAIN + 2` clocks.

## Pipeline timing

Within a PE (clock 0 is the clock the controller issues the read):

| clock | stage |
|---|---|
| 1 | fmap and weight words arrive; depthwise window loads |
| 2 | operand registers; products (combinational) |
| 3 | product registers |
| 3 .. 3+clog2(M) | adder tree, one register per stage |
| +1 | accumulator; result complete on the `last` term |
| +1 | batch norm, quantizing ReLU |
| +1, or +4 with pool | output register, then written to the fmap bank being filled |

## Arithmetic

- **Weights and activations.** Weights are signed `q`-bit two's complement.
  Activations are unsigned `q`-bit, because they are the output of a
  quantizing ReLU.
- **Binarized case.** For `q = 1` the network is binarized: 0/1 stand for
  -1/+1, and the multiplier is an XNOR giving +1 or -1. In the first layer a
  pixel bit (0/1) is multiplied by a +1/-1 weight.
- **Sums.** Products feed the adder tree sign-extended. The accumulator is
  `ACC_W = 32` bits.
- **Batch norm.** Batch norm uses two parameters per channel:
  `y = floor(zeta * (x - alpha) / 2^FRAC)`, with `zeta` a signed
  `ZW = 16`-bit factor and `FRAC = 8`.
- **Activation.** The quantizing ReLU clamps `y` to `[0, 2^q - 1]`. For
  `q = 1` it outputs the sign bit instead.
- **Classification layer.** A layer marked `last` is not quantized. Its
  saturated `y` values leave on `res_data`, one word of `P` scores per
  filter group (`res_addr` = filter group).

## Programming the accelerator

1. Write each PE's weight sub-bank: `wl_we`, `wl_pe`, `wl_addr`, `wl_data`.
2. Write each PE's batch-norm table: `bl_*`.
3. Write the layer table: `dl_we`, `dl_addr`, `dl_data`. The entry type is
   `qsnas_pkg::layer_desc_t`, with these fields:
   - `ltype`: `L_CONV`, `L_FIRST`, `L_DW` or `L_AVG`. An `L_AVG` layer must
     have `k = h = w`, `pad = 0`, `cg = 1` and `ng` = channel groups. The
     `1/(h*w)` factor goes into the batch-norm `zeta` of the layer.
   - `h`, `w`: input height and width
   - `k`: square kernel size, 1..7
   - `pad`: zero padding of `(k-1)/2` if set, none otherwise
   - `stride2`: stride 2 if set, stride 1 otherwise (CONV, first and
     depthwise layers)
   - `pool`: 2x2 max-pool after the activation
   - `last`: classification layer, raw output
   - `cg`, `ng`: input channel groups and filter groups
   - `w_base`, `bn_base`: first weight entry and first batch-norm entry of
     the layer
4. Stream the image: one pixel per clock with `pix_valid`, and `pix_sof` on
   the first pixel. Channel `c` is in `pix_data[8c+7:8c]`.
5. Pulse `start` with `num_layers`. `busy` stays high until `done` pulses.
   Scores arrive on `res_*` during the last layer.

Weights and parameters only need loading once. The image takes one clock
per pixel, so a 32x32 image adds 1,024 clocks to the 46,871 of the
inference.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `Q` | 3 | bits per weight and activation |
| `P`, `M` | 32, 32 | PEs, multipliers per PE (`64s`; must be equal) |
| `WDEPTH`, `FDEPTH` | 1024, 1024 | weight sub-bank and fmap memory depth |
| `BN_DEPTH` | 64 | batch-norm entries per PE |
| `MAX_LAYERS` | 32 | layer table size |
| `ACC_W`, `ZW`, `FRAC` | 32, 16, 8 | accumulator and batch-norm formats |

To target another `s`, set `P = M = 64s` and leave the depths alone. For
example, `P = M = 16` gives the `s = 1/4` configuration.

## Where this RTL departs from the original design, or goes beyond it

These parts are choices of this RTL, where the original design gives no
detail:
- the issue tag and pipeline depths
- the descriptor table and the load ports
- the fixed-point batch-norm format and its rounding
- the fixed drain wait between layers
- the result port
- applying the max-pool after the ReLU
- how stride 2 and the global average pool are scheduled

Not built:
- **MobileNet at full size.** Stride 2 and the global average pool are
  built, but the MobileNet-192 models do not fit the default memories.
  They also need `P = M = 64s` = 48..120, and those sizes have not been
  simulated.
- **`P != M`.** The output word packing relies on `P == M`, and so does
  the depthwise lane assignment.
- **Depthwise kernels other than 3x3, and depthwise pooling.** The
  depthwise patch buffer is fixed at 3x3 (`KDW`). Depthwise layers cannot
  be pooled.
- **Layer chaining.** The layers run strictly one after another, with a
  pipeline drain in between.

The `q = 1` (XNOR) arithmetic has been checked in the multiplier and
batch-norm testbenches, but no whole binarized network has been simulated.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against an integer model written separately, and ends by printing
`TB_RESULT checks=N failures=F`.

- `tb_qsnas_top`: an eight-layer network on an 8x8 image at the default
  size. It covers the first layer, a padded CONV with pool, a depthwise
  layer, a 1x1 CONV, a stride-2 depthwise layer, a global average pool, an
  FC and the raw classification layer. Every fmap word
  written is checked, as are the scores and the exact clock count. It also
  checks that padding, first-layer reads, depthwise patches, pool outputs,
  ReLU clipping at both ends and bank swaps all actually occur.
- `tb_qsnas_vgg`: the full VGG-like network at `q = 3, s = 1/2` on a
  32x32 image, at the default size. It runs 2,282 checks, including the
  872-entry weight use and the 46,871-clock run time.
- Unit testbenches: `tb_qsnas_pe`, `tb_qsnas_controller`,
  `tb_qsnas_adder_tree`, `tb_qsnas_mul_lane`, `tb_qsnas_bn_quant`,
  `tb_qsnas_maxpool`, `tb_qsnas_dw_window`, `tb_qsnas_fmap_pingpong`,
  `tb_qsnas_input_loader`, `tb_qsnas_sram`.

Each testbench also has a watchdog.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/qsnas_pkg.sv \
          tb/tb_qsnas_vgg.sv --top-module tb_qsnas_vgg -o sim
./obj_dir/sim
```

`-y rtl` finds each module in the file of the same name. `-Wno-fatal`
keeps the testbenches' width warnings from stopping the build.
The VGG testbench takes under a minute to build, and the simulation itself
takes about a second.
