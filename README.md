# FPGA convolution engines: Winograd systolic array, HiKonv packed multiplier, LRCN MAC tile, pipelined LeNet pooling

This repository holds synthesizable SystemVerilog for several ways to get more
convolution work out of a fixed budget of FPGA multipliers. They come from one
thesis on resource-efficient CNN acceleration:

* **WinoCNN**: a systolic array of Winograd processing elements (WinoPEs).
  The same F4 datapath (4x4 tiles) runs both 3x3 kernels, as F(2x2,3x3), and
  1x1 kernels, as F(4x4,1x1). Only the output transform changes, through one
  selection bit. A banked input buffer and a three-stage "planar" access
  pipeline feed it whole tiles every cycle.
* **HiKonv**: one wide multiplier, 27x18 as in a DSP48E2, computes a complete
  small 1D convolution of low-bit-width data. It packs a feature chunk into
  one operand and the kernel into the other, and splits the product into
  slices. Longer sequences are built by overlap-adding chunk results.
* **Layer-pipelined LeNet (pooling layer)**: a 2D-window module that takes
  its input pixels in a precomputed "request order". It produces each output
  as soon as its window is complete, so consecutive layers overlap. Only the
  max-pooling + ReLU form is built.
* **LRCN MAC tile**: the parameterised multiply-accumulate IP of a video
  captioning accelerator (CNN plus LSTM). It is a COO x CII tile of MACs with
  ping-pong weight banks. It is fed 12-bit weights that are packed tightly
  into 512-bit memory words.

The engines do not form one system. The top module `hls_accel_top`
places them side by side, and each has its own ports.

## WinoCNN: one datapath for two kernel sizes

### The arithmetic

A Winograd convolution computes an output tile as `Y = A^T [ (G g G^T) ⊙ (B^T d B) ] A`.
Here `d` is a 4x4 input tile, `g` is the kernel and `⊙` is element-wise
multiplication. With 4x4 tiles (omega = 4), the 3x3 and 1x1 cases can share
`B^T` and the 16 multipliers:

```
B^T = [ 1  0 -1  0 ]        A_sel^T = [ 1  1  1  0 ]
      [ 0  1  1  0 ]                  [ 0  1 -1  s ]
      [ 0 -1  1  0 ]                  [ 0  1  1  0 ]
      [ 0  1  0 -1 ]                  [ 0  1 -1 -1 ]
```

With `s = -1`, the first two rows of `A_sel^T` form the usual F(2x2,3x3)
output matrix. The result is a 2x2 output in the top-left corner of the 4x4
result. With `s = 0`, the whole of `A_sel^T` inverts `B^T` up to the scaling
that the 1x1 weight transform `G = [1, 1/2, 1/2, 1]^T` puts in. The result is
a full 4x4 output tile. The hardware sees only a 1-bit `ksel`. All
multiplications are shared.

Weights are transformed offline and stored as 16-bit values `V`. The
testbenches use `V = (2G) g (2G)^T`, which keeps the values integer. Every
output is then exactly 4x the convolution result. Any fixed-point scaling of
V is the user's choice. Kernels larger than 3x3 are meant to be cut into 3x3
pieces padded with zeros. That is done outside the engine.

### Data movement

```
host writes ──► wino_buffer_matrix ──► wino_planar_access ──► wino_input_transform ──┐
                (HB x WB banks)        (3 stages)             (N x B x Q per cycle)    ▼
wino_controller ─► requests                                    wino_systolic_array (M x N winope)
host writes ──► wino_weight_buffer (M banks) ─────────────────► (weights enter row by row)
```

* **Input buffer matrix** (`wino_buffer_matrix`). Pixel `(r, c)` of channel
  group `id` is stored in bank `(r % HB, c % WB)` at address
  `{ r / HB, (c / WB) * ID_groups + id }`. Any HB x WB window, at any
  alignment, then touches every bank exactly once. One word holds Q channels
  x B images of 8-bit pixels. The default is 4 x 8 banks of 8192 words.
* **Planar access** (`wino_planar_access`). It takes 3 cycles:
  1. Register the bank outputs.
  2. Rotate the rows by the window's row offset.
  3. Pick the N tiles out of the column plane, stepping m columns apart
     (m = 2 for 3x3 and m = 4 for 1x1).

  The condition `N*m + 4 - m <= WB` must hold. With the defaults this is
  `8 <= 8`.
* **Input transform** (`wino_input_transform`). Combinational `B^T d B`,
  with 10-bit results.
* **WinoPE** (`winope`). In one cycle it multiplies B images x Q channels of
  4x4 tiles with Q weight tiles and adds over the Q channels. It then adds
  the result to a per-tile accumulator: `first` clears it, and `last` sends
  the result through `A_sel^T · A_sel`. The PE also passes its input tiles
  down and its weights right through one register each.
* **Systolic array** (`wino_systolic_array`). Row i of the weights is
  delayed by i cycles and column j of the tiles by j cycles. PE(i,j) therefore
  works on the matching pair i+j cycles after issue. Each PE sends out its own
  finished tiles with a tag `{og, rt, cg}`.
* **Controller** (`wino_controller`). It issues one request per cycle in the
  order output-channel group → tile row → column group → input-channel group.
  The input-channel group is innermost, so each PE finishes a tile before it
  moves on. The weight address is `og * n_idg + idg`.

### Using the engine

1. Set `cfg_n_idg` first. The input address map depends on it.
2. Write the padded input block through `in_wr_*`.
3. Write the transformed weights through `w_wr_*`. Output channel `oc` goes
   to row bank `oc % M`, at address `(oc / M) * n_idg + idg`.
4. Set `cfg_ksel`, `cfg_n_og`, `cfg_n_rt` and `cfg_n_cg`, then pulse `start`.

Output tile `(og, rt, cg)` from PE(i,j) covers output channel `og*M + i`,
output rows `rt*m ...` and output columns `(cg*N + j)*m ...`, for both images.

Timing: the run takes `n_og·n_rt·n_cg·n_idg` issue cycles plus a fixed
pipeline of `4 + (M-1) + (N-1) + 2` cycles (18 at the defaults). `done`
comes 2 cycles after that.

Default sizes (ZCU102 F4 configuration): M = 8, N = 2, Q = 4, B = 2,
HB = 4, WB = 8, input depth 8192, weight depth 1024. Per cycle that is
8·2·2·4·16 = 2048 multiplications.

## HiKonv: a convolution inside one multiplication

For p-bit features and q-bit weights, each value is given a slice of S bits,
where `S = p + q + ceil(log2(min(N, K)))`. The feature chunk
`f[0..N-1]` is packed into `A = Σ f[n]·2^{Sn}` and the kernel `g[0..K-1]`
into `B`. The product then holds `y[m] = Σ f[n] g[m-n]` in slice m. N and K
are the largest pair whose packed operands fit the multiplier ports. The
package function `best_nk` searches for them. For a 27x18 multiplier with
4-bit data this gives N = 3, K = 2 and S = 9, so 6 multiply-accumulates come
out of one product.

Signed values need a correction. Each slice is written as `f[n]` minus the
sign bit of the slice below it, so that the packed number equals the true
sum. The top slice is sign-extended. When reading slices back, the sign bit
of the previous slice is added to each one (`hikonv_unit`, pipeline:
pack → multiply → slice, 3 cycles).

`hikonv_conv1d` streams a sequence of X·N features one chunk per cycle. Each
chunk's first K-1 outputs overlap the previous chunk's last K-1 outputs. These
are added with small adders after slicing. After the chunk marked `in_last`,
the K-1 tail outputs appear on `tail_out`. The latency is 4 cycles.

## LRCN: MAC tile and weight regrouping

`lrcn_mac_tile` computes `out[coo] += Σ_cii w[coo][cii]·in[cii]` for
COO = 16 output channels x CII = 24 input channels, one pixel per cycle.
Data is 16 bit, weights 12 bit and accumulators 48 bit. `in_first` starts a
sum, and `in_last` presents it one cycle later. The weights sit in two banks.
The idle bank is filled 128 weights per beat, in consumption order (row-major
`[coo][cii]`, 3 beats per tile), while the other bank computes. `swap`
exchanges the banks.

512 bits do not hold a whole number of 12-bit weights. `lrcn_weight_unpacker`
therefore collects three 512-bit bus beats, 1536 bits, and cuts them into 128
weights, with no bit wasted. Weight i is bits `[12i+11:12i]` of
`{beat2, beat1, beat0}`.

## LeNet pooling layer: scheduling by request lists

In the layer-pipelined LeNet design, each layer sends "chunks" (all channels
of one pixel) to the next. Layers are scheduled backwards. The last layer
produces its outputs in row-major order. Each earlier layer is told to
produce its outputs in exactly the order in which the next layer's windows
first need them: walk the next layer's outputs in order and append the
window pixels not yet listed. A second list records how many chunks must
have arrived before each output can be computed.

`win2d_maxpool` builds both lists at elaboration, with constant functions, as
ROMs. It writes each arriving chunk into its buffer RAM at the listed
coordinate. When the received count reaches the next computation-list entry,
it pauses input and reads the window's chunks, one per cycle. It then
outputs the per-channel maximum, clipped at 0 (ReLU). For LeNet's first
pooling layer (24x24x8 in, 2x2 window, stride 2) the first output appears
after 4 input chunks, not after 576.

Handshakes are valid/ready on both sides. Data is 16-bit signed. An output
costs F*F+1 read cycles plus the handshake.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
models written independently in the bench: direct convolutions, dot products
and loop nests. The benches use random data with `$urandom` and have a
watchdog.

* `tb_winocnn` runs three layers (3x3, 1x1, 3x3; 8 input and 16 output
  channels) at the default sizes. It checks every output tile and the cycle
  count.
* `tb_hls_accel_top` runs all four engines at default parameters. It counts
  3x3 runs, 1x1 runs, channel accumulation, HiKonv overlap-add and tails,
  LRCN bank swaps and accumulations, and pooling outputs produced while input
  is still arriving. It fails if any of them never happened.
* Unit benches cover odd window alignments in the buffer matrix and the
  planar access, extreme 4-bit values (-8, 7) in HiKonv, random gaps between
  beats in the unpacker, and loading during compute in the MAC tile.

To simulate with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/wino_pkg.sv rtl/hikonv_pkg.sv \
    tb/tb_hls_accel_top.sv -y rtl --top-module tb_hls_accel_top -Mdir obj -o sim
./obj/sim        # prints TB_RESULT checks=... failures=...
```

For the other benches, replace the testbench file and the top module name.

## Where this design departs from the thesis

* **PE accumulation.** The thesis keeps ping-pong 18-bit output buffers
  (depth D_out) in every PE, and the channel loop sits outside the tile loops.
  Here the channel groups are the innermost loop. Each PE accumulates one tile
  in 32-bit registers and streams it out finished, so no output buffer is
  needed and there is no D_out.
* **Systolic links.** The thesis describes row and column FIFOs between PEs.
  Here each link is a single register with edge skew. This is enough because
  the controller issues a fixed, stall-free schedule.
* **Buffer word.** The thesis sizes each input bank for B 8-bit pixels. Here a
  bank word holds Q channels x B images, so one read serves a whole PE column.
* **Transform matrices.** `B^T`, `A_sel^T` and the 1x1 `G` given above were
  derived for this design and verified in simulation.
* **HiKonv overlap-add.** It is done on sliced values, not on packed words
  with guard bits.
* **Bit orders.** The unpacker's bit order and the LRCN load order are this
  design's choices.

## What is not included

* The host processor, DDR memory and DMA engines of all three systems.
* The WinoCNN output write-back, activation and pooling.
* Loop control for the LRCN tile over pixels and kernel positions. The
  REALM per-layer resource split is a design-time calculation.
* The rest of the LeNet/CifarNet layer-pipelined design: the convolution
  form of the 2D-window module, the fully connected module and the chaining
  of the layers.

Engine limits at the default sizes:

* Up to 32 buffered input rows.
* `ceil(W/8)·ID/4 <= 1024` input words per bank.
* `n_og·n_idg <= 1024` weight entries.
* At most 255 iterations per loop counter.

Larger layers are processed in row blocks and output-channel passes by the
host.
