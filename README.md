# Hybrid 8x8 / 8x2 dot-product engine for CNN layers

Quantizing weights to 2 bits makes a CNN layer much cheaper, but usually the
first and last layers of a network must keep 8-bit weights to hold accuracy. A
fixed 8x8 multiplier array wastes most of its width on 2-bit layers, and a
2-bit array cannot run the 8-bit layers at all. This design uses one
arithmetic core for both. A core always takes 64 bits of activations (eight
8-bit activations) and 64 bits of weights per clock:

* in a **2-bit layer** the 64 weight bits are eight 2-bit weights (values -1,
  0, 1) of each of **four different kernels**. The core computes four dot
  products at once.
* in an **8-bit layer** the same 64 bits are eight 8-bit weights of **one**
  kernel, cut into four 2-bit digits. The core computes the four "digit
  planes" as four 8x2 dot products. The result stage adds them with weights
  64, 16, 4 and 1.

Only the meaning of the weight bits and one multiplexer input change between
the modes. In both modes the core does 32 activation x 2-bit-weight products
per clock. A 2-bit layer therefore does four times the work per clock of an
8-bit layer.

The core sits in a layer accelerator: a 6 x 16 array of cores, a banked
feature map memory, one kernel memory per column, a result path with ReLU and
max pooling, and a sequencer. The accelerator runs one layer pass at a time
and writes each layer's outputs back into the feature map memory, where they
become the next layer's input.

## The core, from the bottom up

### Weight codes and the MACC unit (`macc`)

The MACC unit is an adder, not a multiplier. Its operands are a chain input
`x` and three precomputed multiples of one activation: `i2 = A`, `i1 = 2A` and
`i0 = 3A` or `-A`. The 2-bit weight code `{i4,i3}` selects the addend through
one five-input function per bit:

    f = ~i4 i3 i0  |  i4 ~i3 i1  |  i4 i3 i2

This maps onto one LUT per bit. The LUT gives both `f` and `~f`; `x` picks one
of them as the carry-chain propagate `p = x ^ f`, and `f` is the generate. So
each sum bit costs one LUT plus one carry-chain position. The RTL builds this
bit by bit: a `W`-bit ripple chain.

From `f`, a code selects its addend like this:

| code `{i4,i3}` | addend | 2-bit layer weight | 8-bit layer digit, planes 0-2 | top digit (plane 3) |
|---|---|---|---|---|
| `00` | 0 | 0 | 0 | 0 |
| `11` | A | +1 | 1 | +1 |
| `10` | 2A | (unused) | 2 | (2, not used) |
| `01` | i0 | -1 (`i0 = -A`) | 3 (`i0 = 3A`) | -1 (`i0 = -A`) |

**The code is therefore the two's-complement negation of the digit, modulo 4.**
It is not the digit's plain binary value. Software that writes weights must
encode them this way. `hdp_pkg::encode_w2` and `hdp_pkg::encode_w8` do it,
and the testbenches use them.

An 8-bit weight is `w = 64*d3 + 16*d2 + 4*d1 + d0`. Here d0..d2 are in 0..3
and the top digit d3 is in -1..1. **8-bit weights are therefore limited to
-64..127**, not -128..127. This follows from giving the top plane only `-A`
(and not `-2A`). Quantization for this engine has to respect that range.

Activations are unsigned 8-bit values: image pixels or ReLU outputs.

### Cell (`dp_cell`): two systolic MACC chains

A cell handles one weight plane, computing one of DP0..DP3. Its eight MACCs
form two chains of four. Activations 0-3 feed the upper chain and 4-7 the
lower one, and each chain starts from 0. A register follows every MACC.
Stage k of a chain gets its activation multiples and weight code through a
k-cycle delay line, so each operand meets the partial sum it belongs to. The
two chain outputs are added into an accumulator. `in_first` clears the
accumulator and `in_last` copies it to `dp`.

* Throughput: one 64-bit activation word plus one 64-bit weight word per
  clock, with no gaps between dot products.
* Latency: `dp_valid` comes 5 clocks after the last word (4 chain stages plus
  the accumulator).
* Widths: 13-bit chains (four terms in -255..765 fit exactly). The
  accumulator is 32 bits, ample for 9216-element kernels.

### Core (`hybrid_core`, `act_multiples`)

`act_multiples` computes A, 2A and -A once per activation. It also computes
the mode-selected `3A` (8-bit layers) or `-A` (2-bit layers) for cells 0-2.
Cell 3 always gets `-A`, because the top digit is signed in both modes. Four
cells share the multiples. Cell j reads plane j of the weight word: bits
`[16j+15:16j]`, with weight i at `[16j+2i+1:16j+2i]`.

### Result stage (`combine_relu`)

The combination `64*DP3 + 16*DP2 + 4*DP1 + DP0` runs only once per completed
dot product, so it sits outside the cores, in front of the memory write
ports. ReLU follows. The document does not say how the wide result becomes an
8-bit activation again. This design shifts right by a per-layer `shift`
(0-31) and saturates at 255.

## The accelerator (`hdp_accel`)

```
             kernel memories (one per column, K0..K15)
                 |        |              |
  FMM bank 0 -> core --- core --- ... --- core  -> result path 0 -> FMM bank 0
  FMM bank 1 -> core --- core --- ... --- core  -> result path 1 -> FMM bank 1
     ...                                                  ...
  FMM bank 5 -> core --- core --- ... --- core  -> result path 5 -> FMM bank 5
                 ^ address generator drives every bank and kernel memory
```

* **Rows are images of the batch.** Each row has its own feature map memory
  (FMM) bank, holding one image. All banks use the same addresses, so one
  address generator drives them all. With 6 rows, 6 images share every weight
  read, which is what keeps fully connected layers from being starved of
  weights.
* **Columns are kernels.** Kernel memory c feeds every core of column c. In
  8-bit mode column c computes kernel c of the pass. In 2-bit mode it computes
  kernels 4c..4c+3. A pass thus produces 16 (8-bit) or 64 (2-bit) output
  channels. For more kernels, the host reloads the kernel memories and runs
  another pass with a different `och_word`.
* Default size: 96 cores x 32 MACCs (6 x 16 x 4 cells x 8). This matches the
  document's hybrid configuration (96 cores, batch 6, 32 MACCs per core). The
  6 x 16 shape is this design's reading of those numbers.

### Data layout and the address generator

Feature maps are stored pixel by pixel, with a pixel's channels in `cw`
consecutive 64-bit words (8 channels per word, channel 8w+i in byte i of word
w). Seen this way, one kernel row of a convolution window is `kw*cw`
consecutive words. A convolution thus becomes a sequence of linear dot
products with no data rearrangement. For output position (oy, ox), kernel row
ky and word j:

    fmm_addr  = in_base + ((oy*stride + ky)*in_w + ox*stride)*cw + j
    kmem_addr = ky*kw*cw + j

A fully connected layer is `oh = ow = kh = kw = 1` with `cw` = input length/8.
There is no zero padding: store padded maps. Kernel memory words follow the
same (ky, kx, channel) order, encoded as above.

### Result path (`result_writeback`, `pool_unit`)

When a row's 16 cores finish, their 64 results go into a queue (4 result sets
deep). One `combine_relu` per row then takes them one core per clock:

* 8-bit mode: each core gives 1 activation, so 2 words per position.
* 2-bit mode: each core gives 4 activations, so 8 words per position.

Activations are packed eight per word in kernel order and written to

    out_base + pixel*ocw + och_word + w

With `pool_en`, each word first goes through `pool_unit`. The first member of
a P x P window is stored in a local memory indexed by the pooled column.
Later members are merged by a per-byte maximum. The last member writes the
pooled word, at the pooled pixel's address. Windows do not overlap. Outputs
outside whole windows are dropped.

### Flow control

The result path needs 16 clocks per position. A dot product takes
`kh*kw*cw` clocks. When kernels are short (a 3x3 window over 8 channels is 9
words), results come faster than one row can write them out. The address
generator therefore holds credits, one per queue entry. It starts a position
only with a credit in hand and otherwise stalls. Each finished result set
returns its credit. `done` pulses once the last set is written. With long
kernels the array runs at one word per clock per position. Short kernels run
at one position per 16 clocks.

### Layer configuration (`hdp_pkg::layer_cfg_t`)

`wmode`, `in_base`, `in_w`, `cw`, `kh`, `kw`, `stride`, `oh`, `ow` (before
pooling), `out_base`, `ocw` (output words per pixel), `och_word` (this pass's
word offset in a pixel), `shift`, `pool_en`, `pool_p`.

### Interface and operation

1. While `busy` is low, fill the FMM banks through `fmm_ext_*` and the kernel
   memories through `km_*`.
2. Present `cfg` and pulse `start`. `busy` goes high.
3. When the last result is written, `done` pulses and `busy` falls.
4. Read results through `fmm_ext_*`: data arrives one clock after the
   request.

External memory and its interconnect are not part of the RTL. These ports
stand in for them.

## What follows the document and what does not

Taken from the document:

* the 64-bit activation and weight interfaces and the two weight sizes;
* the four-kernel interpretation of 2-bit weights;
* the digit-plane decomposition of 8-bit weights, with a signed top digit in
  -1..1;
* the MACC function `f` and its LUT/carry-chain mapping;
* per cell, two chains of four MACCs with 1-, 2- and 3-cycle input delays,
  an adder and an accumulator;
* 3A / -A formed outside the MACCs; -A for the top plane;
* the 64/16/4/1 combination of the planes, and ReLU, in front of the FMM write
  ports;
* pooling through a local memory;
* one kernel memory per column and FMM ports per row;
* 96 cores, batch 6, 32 MACCs per core.

This design's own choices (the document is silent):

* the weight code assignment, which follows from `f`;
* bit layouts, widths (13-bit chains, 32-bit accumulators) and
  requantization by shift and saturate;
* max pooling, non-overlapping only;
* rows as batch images and banked FMM;
* memory depths: FMM 6 x 4096 words (1.5 Mbit), kernel memories 16 x 2048
  words (2 Mbit), pooling memory 256 words per row;
* the address generator's loops and data layout;
* the result queue, credit flow control and start/done handshake.

Limits to know:

* AlexNet's overlapping 3x3/2 pooling, grouped convolutions and zero padding
  are not supported in hardware.
* A whole AlexNet convolutional feature map does not fit in one 4096-word
  bank. Those layers must be run in row stripes by the host. The fully
  connected layers fit.
* The area, 200 MHz timing and frame rates the document reports were not
  reproduced. Synthesis for a device was not run.

## Files

| file | contents |
|---|---|
| `rtl/hdp_pkg.sv` | constants, `wmode_e`, `layer_cfg_t`, weight encoding functions |
| `rtl/macc.sv` | LUT + carry-chain MACC |
| `rtl/act_multiples.sv` | A, 2A, 3A/-A, -A |
| `rtl/dp_cell.sv` | two pipelined MACC chains + accumulator |
| `rtl/hybrid_core.sv` | four cells = one core |
| `rtl/combine_relu.sv` | plane combination, ReLU, requantization |
| `rtl/pool_unit.sv` | max pooling with local memory |
| `rtl/result_writeback.sv` | per-row result queue, packing, FMM writes |
| `rtl/kernel_memory.sv` | per-column weight memory |
| `rtl/feature_map_memory.sv` | banked FMM with row ports and an external port |
| `rtl/address_generator.sv` | layer sequencer with credit flow control |
| `rtl/hdp_accel.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_hdp_accel.sv` | end-to-end run at 2 x 8 cores |
| `tb/tb_hdp_accel_full.sv` | the same run at the default 6 x 16 cores |
| `tb/tb_alexnet_layers.sv` | slices of AlexNet FC1, FC3 and conv3 at the default size |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog fails it if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/hdp_pkg.sv rtl/*.sv \
        tb/tb_hybrid_core.sv --top-module tb_hybrid_core -o sim
    ./obj_dir/sim

Use the same command with any other `tb_*.sv`. The end-to-end testbenches
run five passes of a small network over a batch of images:

1. passes 1 and 2: a 3x3 convolution with 8-bit weights, two kernel groups,
   2x2 pooling;
2. pass 3: a stride-2 convolution with 2-bit weights;
3. passes 4 and 5: fully connected layers with 8-bit and 2-bit weights,
   reading the pooled output of the first layer.

They compare every output word with an integer model. They also check that
each mechanism occurred: both modes, pooling, stalls, ReLU clipping,
saturation, kernel-group offset and layer chaining. The full-size build
takes several minutes to compile and about 2 seconds to run.

What the testbenches establish:

* bit-exact results against integer arithmetic for random data;
* the 5-clock core latency;
* no lost or duplicated results under stalls.

`tb_alexnet_layers` runs one pass of each of three AlexNet-sized layers
with random data at the default size:

* FC1: 9216 inputs, 2-bit weights, 64 kernels;
* FC3: 4096 inputs, 8-bit weights, 16 kernels;
* conv3: one output row of 13 pixels, 3x3x256 kernels, 2-bit weights, 64
  kernels.

These passes check that real layer sizes fit the memories and the address
arithmetic. A whole network was not run.

None of the testbenches measures performance on a real network.
