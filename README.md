# Winograd systolic CNN accelerator (2-D and 3-D convolution, FC processor)

This is a streaming accelerator for CNN inference. It targets deep networks with 3×3 filters, such as VGG-16 for images and C3D for video, whose 3×3×3 filters also slide along time.

Convolution runs on a grid of 32 processing elements (PEs):
- Every PE computes one output channel.
- All PEs see the same stream of input data.
- The input goes through a Winograd F(6,3) transform, so each multiply-accumulate step produces six output pixels' worth of work with 8 multiplies instead of 18.

Fully connected (FC) layers run on a separate single-PE processor. Its layers can overlap the convolution layers of the next input.

The design is a set of independent kernels joined by blocking FIFO channels (valid/ready). Each kernel is started per layer by a small controller. Off-chip memory is reached through one simple request/response port per kernel.

```
 conv controller ──kstart/cfg──► every conv kernel (waits until all are idle)

 dr_* ─► mem_read_data_ddr ─ch─► mem_read_data ─► winograd_xform ─deep ch─┐
         (tile walk, lane reads)  (double tile buffer,                    │
                                   condition word)                        ▼
 wr_* ─► mem_read_weight ──────────────────────────────────deep ch─► systolic_array
         (weight plates tagged with their PE, zero filters)          (4 × 8 PEs)
                                                                          │
 ow_*/os_* ◄── mem_write ◄── inv_winograd ◄───────────────────────────────┘
              (shift, sum layer, ReLU, saturate, masked lanes)

 fc controller ─► fc_mem_read ─► fc_pe ─► fw_*      (independent of the above)
 fr_* ─────────────┘
```

## Data units: lanes, plates and bricks

Feature maps are 8-bit signed values. Channels are grouped by `VEC_SIZE` (8), and the 8 channels of one pixel sit side by side in memory as one *lane* of 8 bytes.

Feature memory is addressed in lanes:

```
lane address = base + ((cg * F + f) * H + y) * W + x
```

- `cg` is the channel group, `f` the frame, `y` the row and `x` the column.
- `F`, `H` and `W` are the padded pitches stored in the layer configuration.
- 2-D layers use `F = 1`.

A *plate* is `W_VEC` = 8 consecutive lanes along a row, so 64 values: 8 columns × 8 channels. The datapath moves one plate per clock everywhere. The plate is the input tile of F(6,3): 6 outputs + 3 taps − 1.

For one output-column group, a PE needs the plates for every filter frame `kf`, filter row `kh` and channel group `cg`. Together these make a *brick*. The filter's weight plates for a brick are stored in the same `(kf, kh, cg)` order, with `cg` innermost. A brick yields `INV_VEC` = 6 output pixels per output channel.

Zero padding is not generated in hardware. The input of the first layer is stored with its border. Each layer's output can be written at an offset inside a larger zeroed frame, so it is already padded for the next layer (see `out_base`/`out_w`/`out_h`).

## Winograd F(6,3) in integers

The transforms use integer matrices so that no fractions reach the hardware:

| Step | Where | Matrix |
|------|-------|--------|
| data transform | `winograd_xform`, each plate, per channel | `BT_S = 4·Bᵀ` (8×8) |
| weight transform | host, offline | `G_S = 90·G` (8×3); weights stored as 16-bit Winograd-domain plates |
| element-wise products | PE | summed over a whole brick |
| inverse transform | `inv_winograd`, each PE's 8 accumulators | `AT_S = 32·Aᵀ` (6×8) |

The matrices are the usual F(6,3) ones with interpolation points 0, ±1, ±2 and ±½.

The chain gives exactly `WINO_SCALE = 4·90·32 = 11520` times the direct convolution. The output writer divides the factor back out as part of its per-layer right shift:

```
out = sat8( relu( (conv * 11520) >>> shift  [+ old value for a sum layer] ) )
```

Choosing `shift` therefore sets both the fixed-point scaling of the layer and the removal of the Winograd gain. For example, `shift = 13` keeps the result at about 1.4× the raw sum of products.

Widths:
- transformed data and weights: 16 bits (`XW`);
- PE accumulators: 48 bits (`ACCW`);
- inverse-transform results: 64 bits (`OUTW`).

None of these can overflow for 8-bit inputs and the largest filters that fit the weight buffers.

## Tiles and the double data buffer (`mem_read_data_ddr`, `mem_read_data`)

A layer is cut into tiles along width, height and frames. The layer configuration sets the tile size (`tile_owg` groups of 6 output columns, `tile_oh` rows, `tile_of` frames) and the tile count per dimension.

An input tile holds every lane that its outputs need, across all channel groups. It is read once from memory, one read request per lane, by `mem_read_data_ddr`. That kernel only issues addresses and passes responses on, so slow memory never stalls the streaming side.

`mem_read_data` keeps two tile buffers:
- One buffer is loaded from the incoming stream.
- The other streams plates to the array.
- They swap when the load buffer is full and the compute buffer has sent every plate of its tile.

Each buffer is split into `W_VEC` banks by column modulo 8. A plate can then start at any column, which it must: output groups start every 6 columns, so consecutive plates overlap by 2 lanes. The plate is read in one cycle and rotated into lane order. This is how every loaded lane is reused for all outputs of the tile.

The streaming order is tile-major. For each set of 32 filters, all tiles are streamed. Within a tile the order is output frame → output row → output column group → `kf` → `kh` → `cg`. Weights are loaded once per set and the input is re-read once per set. This suits the deep layers, where weights dominate.

With every plate, the reader attaches a 32-bit *condition word*. It evaluates once what every PE would otherwise test:
- `FIRST` (bit 0) clears the accumulators;
- `LAST` (bit 1) ends a brick, so the PE emits its block;
- `SET_END` (bit 2) marks the last plate of the current filter set, so the PE releases its weight buffer.

## Weights: forwarded, double-buffered (`mem_read_weight`, `pe`)

`mem_read_weight` sends all weight plates of one set into PE(0,0): 32 filters × `kf·kh·cg` plates. Each plate is tagged with the index of the PE that keeps it and a last-plate flag. The plates travel through the array on the same paths as the data, and each PE keeps only its own.

Filter slots past the layer's output-channel count are filled with zero plates without a memory read. Every PE therefore always completes a set, and the array never waits for a weight set that does not exist.

Each PE has two weight buffers of `WDEPTH` = 576 plates. This is the largest C3D filter: 3×3×3×512 values / 64. A new set loads into the free buffer while the other computes, so weight loading is hidden behind computation. A layer whose filters exceed 576 plates is split by channel groups into sub-layers joined by sum layers (see below).

## The semi-1-D systolic array (`systolic_array`, `pe`)

A 1-D chain of n PEs needs output channels whose widths grow as 1, 2, … n blocks, because each PE appends its block to what it received. Here the 32 PEs form a 4 × 8 grid (`PE_ROWS` × `PE_COLS`), numbered `p = col·4 + row`.

- **Data and weights.** Plates enter at PE(0,0). Row 0 passes them right along the row and also down. Every other row passes them down its column. A weight plate goes right only while its target column lies further right.
- **Outputs.** Each PE appends its `W_VEC` accumulators to the blocks from the PE above. The last-row PE of each column also receives the chain from the last-row PE of the column to its left. The last PE of the grid delivers all 32 blocks, block k from PE k, to `inv_winograd`.

Compared with a 32-long chain, the widest output link carries 32 blocks only at the very end, and most links carry at most 4.

Each PE has two pipeline stages:
1. weight-buffer read;
2. W_VEC dot products of VEC 16-bit products each.

A PE takes one plate per clock when nothing stalls. Every PE-to-PE link is a 2-deep FIFO (`LINK_DEPTH`). A PE stalls its input when a link it forwards to is full, or when a new block is ready while the previous one has not been sent. Back-pressure from `mem_write` therefore reaches the whole array.

## Output writer and sum layers (`inv_winograd`, `mem_write`)

`inv_winograd` turns each PE's 8 accumulators into 6 pixels. `mem_write` then walks the same tile order as the reader.

For each group of 8 output channels it writes the 6 output lanes of a column group with a lane mask. Columns beyond the valid width (`out_wv`) are not written. Channel groups made only of zero-padding filters are skipped.

For a **sum layer** (`sum = 1`), the writer first reads the 6 lanes already in memory and adds them after the shift. A layer whose weights do not fit the buffers is split along input channels into sub-layers. The second and later sub-layers write as sum layers onto the first one's output. The splitting costs no extra input traffic, since each sub-layer reads a different part of the input.

## FC processor (`fc_mem_read`, `fc_pe`)

FC layers have no weight reuse, so the processor does not load weights into a buffer. Instead, `fc_mem_read` first streams the layer's input vector (`in_plates` plates of 64 values) into the input buffer of `fc_pe`. It then streams the weight rows, one plate per clock.

`fc_pe` multiplies each weight plate with the matching input plate: 64 8-bit products per clock, summed in 32 bits. At the end of a row it shifts, optionally applies ReLU, saturates, and writes one byte.

The buffer holds `FC_DEPTH` = 392 plates, which is 25088 inputs, the largest FC input of VGG-16. FC weights are plain 8-bit values, not transformed. The FC processor has its own controller and memory ports, so it runs concurrently with the convolution processor.

## Programming the accelerator

Each processor has a layer table of up to 32 entries (`MAX_LAYERS`):
1. Write entries through `*_cfg_wr_en/addr/data`.
2. Pulse `*_start` with `*_num_layers`.

The controller then runs the layers in order. For each layer it pulses every kernel's `kstart`, holds the configuration, and waits until all of its kernels are idle. `*_busy` is high throughout, `*_layer` gives the current entry, and `*_done` pulses at the end.

Convolution layer fields (`cnn_pkg::conv_cfg_t`):

| field | meaning |
|-------|---------|
| `in_base`, `in_w`, `in_h`, `in_f`, `in_cg` | input lane address and padded pitches; input channel groups (C/8) |
| `kh`, `kf` | filter rows and frames (filter width is 3; `kf = 1` for 2-D) |
| `w_base`, `out_ch`, `m_sets` | first weight plate; output channels M; `ceil(M/32)` |
| `tile_owg`, `tile_oh`, `tile_of` | output tile: groups of 6 columns, rows, frames |
| `n_tw`, `n_th`, `n_tf` | number of tiles along width, height, frames |
| `out_base`, `out_w`, `out_h`, `out_f`, `out_wv` | address of output pixel (0,0,0), output pitches, valid output width |
| `shift`, `relu`, `sum` | scaling shift, ReLU enable, sum layer |

The tile buffer constraint is: `in_cg · (tile_of + kf − 1) · (tile_oh + kh − 1) · ceil((6·tile_owg + 2) / 8) ≤ TILE_DEPTH`.

The weight buffer constraint is: `kf · kh · in_cg ≤ WDEPTH`.

The host has four duties:
- arrange inputs in the lane layout with a zero border;
- transform and arrange the weights (`G_S` applied to each 3-tap filter row; the plate for filter `m`, filter frame `i`, filter row `j` and channel group `g` sits at `w_base + m·(kf·kh·in_cg) + (i·kh + j)·in_cg + g`, as 16-bit values);
- zero the output frames that will be read as padded inputs;
- fill the layer tables.

The FC fields (`fc_cfg_t`) are `in_base` and `in_plates` (input plates), `w_base` (row `o` at `w_base + o·in_plates`), `out_ch`, `out_base` (byte address), `shift` and `relu`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `VEC_SIZE` | 8 | channels per lane; VEC_SIZE·W_VEC = 64 bytes, one memory burst |
| `W_VEC` / `INV_VEC` | 8 / 6 | Winograd input / output tile width |
| `PE_ROWS` × `PE_COLS` | 4 × 8 | PE grid (32 output channels in parallel) |
| `WDEPTH` | 576 | weight plates per PE buffer (two buffers per PE) |
| `TILE_DEPTH` | 2048 | lanes per bank per tile buffer (two buffers of 8 banks) |
| `FC_DEPTH` | 392 | FC input plates |
| `DEEP` | 64 | depth of the channels in front of the array and after the DDR reader |

At the defaults, the on-chip memory is about 40 Mbit: 37.7 Mbit of weight buffers, 2.1 Mbit of tile buffers and 0.2 Mbit of FC buffer. The MAC datapath has 2048 16×16 multipliers in the array and 64 8×8 multipliers in the FC PE.

## Where this design departs from, or fills in, the original description

**Grid shape.** The original sizes the grid as ⌈√n⌉ × ⌈√n⌉. This design uses 4 × 8, so exactly 32 PEs exist.

**Condition word.** It is computed in the tile reader, one step before PE0, instead of inside PE0. The PEs receive the same word either way.

**Weights forwarded through the array.** Weights travel through the array, like the data, rather than over dedicated channels from the weight reader to every PE. The original describes both; forwarding is its later, faster variant.

**Left to this design.** The original does not fix the following, and this design chooses them:
- the integer Winograd scaling and host-side weight transform;
- the memory placement of frames;
- all widths, depths and buffer sizes;
- the valid/ready protocol;
- synchronous active-low reset;
- the layer-table format;
- zero filters for partial sets;
- the output masking.

**Not built:**
- Pooling layers, and any other layer besides convolution and FC.
- Bias: no bias is added.
- Strides other than 1 and filter widths other than 3. AlexNet's 11×11 and 5×5 layers and ResNet's strided and 7×7 layers cannot run; their 3×3 stride-1 layers and FC layers can.
- Padding in hardware.
- The alternative array with time-shared channels, where data, weights and outputs share one link per PE. It saves flip-flops at a small speed cost but is not part of this design.
- The vendor cached load/store unit and the DDR controller. The memory ports stand in for them.

**Capacity.** VGG-16's largest filter needs 192 of the 576 weight plates. C3D's needs exactly 576, so neither network needs sub-layers at the defaults. Both networks' FC inputs fit the FC buffer.

## Verifying and simulating

Every module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb/ddr_model.sv` is a behavioural memory with in-order responses, random latency and random back-pressure.

Run any testbench with plain verilator:

```
verilator --binary --timing --assert --top-module tb_cnn_accel_top \
    rtl/cnn_pkg.sv rtl/*.sv tb/*.sv -o sim && obj_dir/sim
```

- **Block tests.** These compare each block against an independent model:
  - Package constants: the integer Winograd matrices are checked end to end against direct convolution times 11520.
  - Winograd transforms: checked against direct convolution.
  - FIFOs and the controller: checked against their protocols.
  - Address streams: checked against loop nests.
  - PE and array: checked against dot products at reduced sizes.
  - Writer: checked with shift, sum, ReLU and saturation.
- **`tb_cnn_accel_top`**. This runs the whole accelerator at reduced size: VEC 2, 2 × 2 PEs. The convolution processor runs four layers:
  - a 2-D layer written with a zero border;
  - a second 2-D layer that reads the first one's output;
  - a 3-D 3×3×3 layer over two frame tiles;
  - a sum layer that completes a channel-split 3-D convolution.

  Meanwhile, two FC layers run concurrently on the FC processor. All memory is compared with direct convolution scaled by 11520. The test also counts how often each mechanism happened, and an unused mechanism is a failure. The mechanisms are:
  - tile load during compute;
  - weight load during compute;
  - array-input stalls;
  - zero filters;
  - masked columns;
  - skipped channel groups;
  - sum-layer reads;
  - saturation and ReLU;
  - FC/convolution overlap;
  - 3-D plates;
  - memory stalls.
- **`tb_cnn_accel_full`**. This runs the accelerator at its default parameters: one 3×3 layer of 384 → 40 channels, i.e. 144 weight plates per filter and two filter sets, the second mostly zero filters, so both weight buffers of every PE are filled. A 64 → 4 FC layer runs next to it. It takes well under a minute.

- **`tb_cnn_workloads`**. This runs the largest layers of the two target networks at default parameters, each on a small output area:
  - a C3D conv5-style 3×3×3 layer with 512 input channels, whose 576-plate filters fill the weight buffers exactly;
  - a VGG-16 conv5-style 3×3 layer with 512 input channels;
  - an FC layer with VGG-16 FC6's 25088 inputs, which fills the FC buffer;
  - an FC layer with C3D FC6's 8192 inputs.
- **Rate.** `tb_pe` feeds an unobstructed PE back-to-back plates and checks that it accepts one plate per clock. `tb_fc_pe` does the same for the FC PE's weight stream.

The testbenches hold the host's part of the work: data arrangement, the weight transform with `G_S`, and the layer tables. They are the reference for how to drive the accelerator.
