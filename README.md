# ArchE-Q: a multiplier-free streaming accelerator for LiDAR-aided beam prediction

A vehicle with a LiDAR wants to know which of the 64 beams of a mm-wave base
station will serve it best, without sweeping through all of them. The LiDAR
point cloud is reduced to a 20 x 20 bird's-eye-view occupancy grid (one bit
per cell: occupied or not), and a small 2-bit quantized CNN maps that grid
to a beam index. This RTL is the CNN accelerator: a chain of layer
engines, each working on its own frame, with no multipliers at all.

The datapath needs no multipliers because of the number formats:

* The first layer's input is binary, so "input x weight" is "weight or zero"
  (**select-accumulate**, SAC).
* All later activations are 2-bit unsigned and all weights 2-bit signed, so a
  product is two conditional additions (**conditional-add-accumulate**, CAA).
* Batch normalisation and the 2-bit activation collapse into three
  **thresholds** per channel. The activation is the number of thresholds the
  accumulator reaches.

Two structural ideas reduce buffering:

* Convolution, activation and max-pooling are fused into one layer engine,
  the **XVAU** (extended vector activation unit).
* Both the convolution windows and the pooling windows are read straight out
  of frame buffers by address generation. No im2col or sliding-window copy is
  ever built.

## Pipeline

```
 in_bit ──► XVAU-1 ──► FIFO ──► XVAU-2 ──► FIFO ──► XVAU-3 ──► FIFO ──► FC-1 ──► FIFO ──► FC-2 ──► beam_select ──► beam_idx
 20x20x1    SAC PEs             CAA PEs             CAA PEs            buffer            buffer    argmax of 64
            conv3x3+th+pool     conv3x3+th+pool     conv3x3+th+pool    FC+th             FC (raw)
```

| stage | input | output | PE | SIMD | weight RAM | cycles / frame |
|---|---|---|---|---|---|---|
| XVAU-1 | 20x20x1 (1 bit) | 10x10x16 | 8 | 1 | 18 x 16 bit | 400 x (18+4) = 8,800 |
| XVAU-2 | 10x10x16 | 5x5x16 | 8 | 4 | 72 x 64 bit | 100 x (72+4) = 7,600 |
| XVAU-3 | 5x5x16 | 2x2x32 | 2 | 8 | 288 x 32 bit | 25 x (288+4) = 7,300 |
| FC-1 | 128 | 64 | 32 | 1 | 256 x 64 bit | 2 x (128+4) = 264 |
| FC-2 | 64 | 64 scores | 16 | 1 | 256 x 32 bit | 4 x (64+4) = 272 |

In every layer, PE output channels (or neurons) are computed in parallel, and
each PE consumes SIMD inputs per cycle. The rest of the work is *folded* in
time over the same PEs. The PE counts 8/8/2/32/16 and the 20 x 20 / 64-beam
sizes are those of the published design in its "ArchE-Q-8" configuration.
The following are not published and were chosen here:

* channel counts 16/16/32;
* 3x3 kernels with 'same' padding and 2x2 pooling;
* FC widths 128 -> 64 -> 64;
* the SIMD widths.

These choices give 19,344 2-bit weights (4.8 KB) plus 384 thresholds, close
to the 5.2 KB model size reported for the original network.

In simulation at these defaults:

* A new frame enters every 8,840 cycles, set by XVAU-1. That is 11,300
  frames/s at 100 MHz. The published design reaches about 7,300 frames/s with
  its own, unpublished layer sizes.
* One frame takes 12,462 cycles from its first grid cell to the beam index:
  0.125 ms at 100 MHz, against 0.137 ms published.
* With 4 PEs in XVAU-1 and XVAU-2 (`PE1 = PE2 = 4`, the "ArchE-Q-4"
  configuration), a frame enters every 16,040 cycles (6,200 frames/s, against
  5,586 published). Latency is 21,102 cycles (0.211 ms, against 0.179 ms
  published).

## The arithmetic units

**SAC (`sac_array`).** Each PE adds `x[l] ? w[p][l] : 0` over its SIMD lanes
to its accumulator. The first layer uses ternary weights (-1, 0, +1) in 2-bit
two's complement. The unit accepts -2 as well.

**CAA (`caa_array`).** The 2-bit weight `w = {w1,w0}` has the value
`-2*w1 + w0`. For an activation `a` in 0..3, the product is

```
a*w = (w0 ? a : 0) + (w1 ? -(2a) : 0)
-(2a) when w1 = 1:  ((2a & {w1..}) ^ {w1..}) + w1     (invert, then carry-in)
```

So each lane costs an AND/XOR mask and a small adder. The PE sums its lanes
into a 16-bit signed accumulator. A `first` flag starts a new sum instead of
adding to the old one.

**Thresholds (`act_th`).** The 2-bit output is `(acc >= T0) + (acc >= T1) +
(acc >= T2)`, with 16-bit signed thresholds per channel. Folding a
batch-norm's scale and shift into these thresholds is done offline. The
last layer skips this step and hands out raw sums.

**VATU (`vatu`).** The vector arithmetic and threshold unit bundles the
layer's weight RAM, threshold RAM, PE array (SAC if `IBITS=1`, CAA if
`IBITS=2`) and threshold stage. Its pipeline:

1. A fold step is issued with a weight address, a channel group and
   first/last flags.
2. The operand vector must arrive one cycle later. That is where the
   activation buffers, which all have registered reads, deliver it.
3. After the last step of an accumulation, the PE results come out 3 cycles
   after that step was issued, as a one-cycle `res_valid` pulse.

## Inside an XVAU

**Convolution core (`conv_core`).** Input pixels (all channels of one pixel
per beat, raster order) are written into a frame buffer. For each output
pixel, the controller issues `NG*9*SG` steps, one per cycle, in this order:

1. channel group g (NG = COUT/PE groups);
2. kernel row;
3. kernel column;
4. input-channel slice sg (SG = CIN/SIMD slices).

Each step reads the one buffer word that the window tap points at. A tap
outside the frame reads as zero, which gives the padding. An output pixel
starts as soon as the input rows its window needs have arrived, so loading
and computing overlap. Group results are collected into one word holding
all COUT activations. That word is offered downstream, and the next pixel
starts once it has been accepted (4 cycles of overhead per pixel).

**Max-pool (`maxpool`).** Conv output pixels go straight into a second frame
buffer, with no FIFO in between. Pooling works like this:

* Its controller reads the four pixels of each 2x2 window directly from the
  buffer and keeps a running per-channel maximum. It needs P\*P+2 cycles per
  pooled pixel.
* A pooled row is read as soon as the two conv rows under it have been
  written, so pooling runs alongside the convolution.
* When H or W is odd (5x5 in XVAU-3), the last row or column is written but
  never pooled.

**Frame hand-over.** Each buffer accepts the next frame only after the
current frame has been fully consumed. With one buffer per stage, a layer
works on one frame at a time, and different layers work on different frames.

## Fully-connected layers (`fc_layer`)

Incoming beats are stored one after another in a buffer, which flattens
them. Element `beat*IN_PAR + lane` of the vector is lane `lane` of beat
`beat`. For the FC-1 input, that means pixel-major, channel-minor (HWC)
order. Once the vector is complete, it is read from the buffer again for
every group of PE neurons. The layer before therefore sends each vector only
once, however many groups there are. Each group's results leave as one beat
(PE values, neuron `g*PE+p` in lane `p`).

## Beam selection (`beam_select`)

FC-2 delivers the 64 scores in 4 beats of 16. This unit keeps the running
maximum and outputs the index of the best beam, with its score. On a tie,
the lower index wins. The other 63 scores are not brought out of the top
level, so a short list of beams to sweep (for example the top 3 or top 5)
would need a different output stage.

## Interfaces

All streams use valid/ready handshakes: a beat moves on a clock edge where
both are high. `rst_n` is synchronous and active low. It clears the control
state but not the RAMs.

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_ready`, `in_bit` | in/out/in | occupancy grid, one cell per beat, row-major, 400 beats per frame |
| `beam_valid`, `beam_ready` | out/in | result handshake, one per frame |
| `beam_idx[5:0]` | out | predicted beam |
| `beam_score[15:0]` | out | FC-2 sum of that beam (signed) |
| `cfg` (`archeq_pkg::cfg_t`) | in | weight/threshold write port: `we`, `layer[2:0]`, `is_th`, `addr[15:0]`, `data[63:0]` |

**Loading a network.** Weights and thresholds must be written over `cfg`
before the first frame, one word per cycle with `we` high. `layer` selects
the target: 0 to 2 are XVAU-1 to XVAU-3, 3 is FC-1 and 4 is FC-2.

Weight RAMs (`is_th = 0`):

* One word per fold step. Weight (PE p, lane l) sits at bits
  `[(p*SIMD+l)*2 +: 2]`.
* Convolution layers: `addr = ((g*3 + ky)*3 + kx)*SG + sg`. The word holds
  output channel `g*PE+p`, input channel `sg*SIMD+l`, tap (ky, kx).
* FC layers: `addr = g*(IN/SIMD) + i`. The word holds neuron `g*PE+p` and
  input `i*SIMD+l`.

Threshold RAMs (`is_th = 1`):

* `addr` is the output channel (`g*PE+p`).
* `data[47:0] = {T2, T1, T0}`, ascending.
* FC-2 has no threshold RAM.

`tb/tb_ref.svh` (functions `conv_word`, `fc_word`, `th_word`) packs these
words from plain weight arrays.

## How far to trust it, and where it departs from the source design

Taken from the published design:

* the layer chain: three fused conv/threshold/pool units, then two FC units,
  with shallow FIFOs between the layers;
* SAC units in the first layer and CAA units elsewhere;
* thresholds in place of batch normalisation;
* conv outputs written to a buffer and pooled by direct window reads;
* FC inputs buffered and reused;
* the 20 x 20 binary input and the 64 beams;
* the PE counts.

Chosen here, because the source gives no values for them:

* channel counts, kernel, pad and pool sizes, FC widths and SIMD widths;
* the threshold and accumulator widths (16 bit);
* the activation rule `acc >= T`;
* the flatten order;
* FIFO depth 2;
* the configuration bus;
* the fold order and the buffer hand-over rules;
* argmax as the way to turn scores into a beam index.

The published figure shows "Act & Th" and a threshold memory in the last
FC layer too. Here the last layer has neither: it outputs raw scores, so
that beams can be ranked.

The published figure draws an "IM2COL" stage in each convolution core.
Here that stage gathers each window by reading the frame buffer at the tap
addresses. Nothing is copied into an im2col matrix.

The source says the FC layers use buffers in place of streaming FIFOs, but
its block diagram still draws a FIFO in front of each FC layer. This RTL
keeps both: each FC layer has a 2-entry FIFO in front of its own buffer.

Not included:

* **LiDAR preprocessing** (polar-to-cartesian conversion, BEV projection,
  binarization). The grid enters already binarized.
* **Trained weights.** No trained network is available. Every test uses
  random weights, with thresholds placed so that all activation levels
  occur. Results are therefore checked for exactness against a reference
  model, not for beam-prediction accuracy.

The layer timing is this implementation's own. The throughput and latency
above are measured, not matched to the published figures.

## Files

| file | content |
|---|---|
| `rtl/archeq_pkg.sv` | widths, layer ids, `cfg_t` |
| `rtl/archeq_top.sv` | the full pipeline |
| `rtl/xvau.sv`, `rtl/conv_core.sv`, `rtl/maxpool.sv` | fused conv layer |
| `rtl/fc_layer.sv` | buffered FC layer |
| `rtl/vatu.sv`, `rtl/wth_mem.sv`, `rtl/sac_array.sv`, `rtl/caa_array.sv`, `rtl/act_th.sv` | compute unit and its parts |
| `rtl/stream_fifo.sv`, `rtl/beam_select.sv` | inter-layer FIFO, output stage |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_archeq_top.sv` | the whole design at default size, 4 frames |
| `tb/tb_archeq_q4.sv` | the "ArchE-Q-4" configuration (4 PEs in XVAU-1/2) |
| `tb/tb_archeq_run.svh` | test body shared by the two system tests |
| `tb/tb_ref.svh` | reference model (plain loops) and weight packing |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. Run from
the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/archeq_pkg.sv tb/tb_archeq_top.sv --top-module tb_archeq_top -Mdir obj
./obj/Vtb_archeq_top
```

The system test takes a few seconds. It prints, for each frame, the beam,
the score and the latency. It also prints the frame interval and how often
each mechanism occurred: SAC and CAA results, padded taps, pooled pixels,
FC vector reuse, full FIFOs, input stalls, result back-pressure and
overlapping frames.

## Changing the size

All sizes are parameters of `archeq_top`. They must satisfy:

* PE divides COUT (or OUT_N);
* SIMD divides CIN;
* the FC-1 input beat width (C3) is a multiple of its SIMD;
* each weight word (PE*SIMD*2 bits) fits the 64-bit configuration data.

Frame time is set by the slowest layer: about `H*W*(COUT/PE*9*CIN/SIMD + 4)`
cycles for a conv layer.
