# B2N2-style Bayesian CNN accelerator with Bernoulli weight sampling

A Bayesian neural network does not have fixed weights: every weight is a
random variable, and an inference is repeated N times (Monte-Carlo passes),
each with freshly drawn weights, so that the spread of the outputs tells how
sure the network is. In hardware, the cost is in drawing the weights. The
usual approach needs a Gaussian random number generator per weight lane,
plus a multiplier and an adder to scale and shift each unit Gaussian to the
weight's mean and variance.

This RTL draws every weight from a scaled Bernoulli distribution instead:

    w = q   with probability p
    w = 0   otherwise

A layer output sums tens to thousands of products (27 to 2,048 here). By the central
limit theorem that sum is close to Gaussian whatever the weight distribution
is, provided each weight keeps its mean E and variance V. With

    p = E^2 / (E^2 + V)        q = (E^2 + V) / E

the Bernoulli weight has mean pq = E and variance p(1-p)q^2 = V. So a weight
sampler is just a uniform random source, a comparator and a multiplexer, with
no multiplier. The memory cost is unchanged: two stored numbers per weight,
(p,q) instead of (E,V). The conversion from (E,V) to (p,q) is done offline,
before the parameters are loaded.

The design follows the B2N2 accelerator (H. Awano, M. Hashimoto,
*Integration, the VLSI Journal*): a streaming pipeline with one processing
element (PE) per layer of a VGG-like CIFAR-10 network. That accelerator was
written in C++ for high-level synthesis. This is an independent RTL
description of it. Where the description left details open, the choices
made here are listed below under "Departures and open points".

## The network

| PE | layer | input (H x W x C) | output | weights per output channel |
|----|-------|-------------------|--------|----------------------------|
| 1 | conv 3x3 + ReLU | 32x32x3   | 32x32x32 | 27   |
| 2 | conv 3x3 + ReLU | 32x32x32  | 32x32x32 | 288  |
| – | max-pool 2x2    | 32x32x32  | 16x16x32 | –    |
| 3 | conv 3x3 + ReLU | 16x16x32  | 16x16x64 | 288  |
| 4 | conv 3x3 + ReLU | 16x16x64  | 16x16x64 | 576  |
| – | max-pool 2x2    | 16x16x64  | 8x8x64   | –    |
| 5 | conv 3x3 + ReLU | 8x8x64    | 8x8x128  | 576  |
| 6 | conv 3x3 + ReLU | 8x8x128   | 8x8x128  | 1152 |
| – | max-pool 2x2    | 8x8x128   | 4x4x128  | –    |
| 7 | dense           | 2048      | 10 logits | 2048 |

The PE number is also the layer id used on the parameter port. In total
there are 307,040 (p,q) pairs, which is 614,080 bytes of weight memory.
The top-level parameters `IMG`, `IN_CH`, `C1`, `C2`, `C3` and `NCLS` scale
the network; set `NCLS = 100` for CIFAR-100.

## Streams between layers

Every link in the pipeline is an AXI-stream with 8-bit data (`valid`,
`ready`, `data`, `last`). Feature maps always travel in **channel-major**
order: all channels of pixel (0,0), then all channels of pixel (0,1), and so
on, row by row. TLAST marks the last value of an image. A PE that cannot
accept data holds `ready` low, and back-pressure travels up the pipeline to
the image input. The layers run concurrently, each on its own image region.

## Inside a convolution PE (`conv_pe`)

A convolution PE has two parts: the im2col unit and the matrix-multiplication
(MM) unit.

### im2col unit (`im2col`)

The im2col unit turns the incoming pixel stream into the stream of 3x3
patches. For each output pixel (r,c), in raster order, it sends 9 x CIN
values:

- The nine taps are sent row-major, from (r-1,c-1) to (r+1,c+1).
- Within a tap, the input channel changes fastest.
- Taps outside the image are sent as 0 (zero padding 1, stride 1), so the
  output map has the same size as the input.

Incoming pixels go into a line buffer of 2W+4 pixels. It works as a shift
register held in a circular buffer: the write slot advances by one pixel for
every pixel received. Each patch tap is read at a fixed offset, dr·W+dc,
from the slot of the centre pixel. The length is two rows plus three pixels
for the 3x3 window, plus one spare pixel so the next input can arrive while
the current patch is being read.

Flow control uses two rules:

- An output pixel starts once its lower-right neighbour has fully arrived.
- Input stalls only when it would overwrite the oldest pixel the current
  patch still needs.

The unit sends one patch element per clock. A new image is accepted only
after the last patch of the previous one has left, which costs about W+1
pixels of idle time per image.

### MM unit (`mm_unit`)

The MM unit has one lane per output channel (`COUT` lanes). The loop over
output channels is fully unrolled, so every lane receives the same patch
element in the same clock. A lane holds:

- `weight_bram`: the lane's (p,q) list, 9·CIN entries, in the order of the
  patch stream (entry t = tap·CIN + ci).
- `weight_generator`: a URNG (`urng`), a comparator and a multiplexer. It
  outputs w = q when p > eps, otherwise 0.
- A multiplier and a 32-bit accumulator.

The unit has a two-stage pipeline. Stage A accepts an element, reads entry t
in every lane's memory and draws a new eps in every lane. Stage B, one clock
later, selects w, multiplies and accumulates. The first element of a patch
restarts the sum from the lane's bias. After the last element, all lane sums
are requantised in the same clock and handed as one bank to `axis_serializer`.
The serializer sends the bank as COUT beats, channel 0 first, which is the
channel-major order the next PE expects.

The MM unit takes one element per clock. It stalls only when a bank is ready
but the previous bank is still leaving. That can happen only when COUT is
larger than 9·CIN (PE 1: 32 > 27), or when the next PE is applying
back-pressure.

### Random numbers

Each lane has its own 16-bit Galois LFSR (x^16+x^14+x^13+x^11+1), seeded from
its layer id and lane number (`lfsr_seed` in `b2n2_pkg`). Each draw advances
the LFSR eight steps, so every 8-bit sample is made of new bits. The LFSR
advances once per weight consumed, not once per clock. The weights drawn
therefore depend only on the data order and not on stalls, which is what
lets a software model reproduce every output bit-exactly. The LFSRs are not
reset between images, so sending the same image again is a new Monte-Carlo
sample.

## Other PEs

- `maxpool_pe` computes a 2x2, stride-2 maximum. A C-entry column register
  holds the left value of each horizontal pair. A (W/2)·C row buffer holds
  the horizontal maxima of even rows. On odd rows the PE sends the final
  maximum. It produces one output for every four inputs and never limits the
  pipeline.
- `dense_pe` is the MM unit with DEPTH = 2048 and no im2col stage. The whole
  flattened 4x4x128 map is one dot product per class. Its weights are drawn
  the same way as in the convolutions, and no ReLU is applied.

## Number formats

Everything is 8-bit fixed point:

| quantity | format |
|----------|--------|
| activations, bias | signed, 4 fraction bits (range -8 .. 7.94) |
| q | signed, 6 fraction bits (range -2 .. 1.98) |
| p | unsigned, value p/256 |
| eps | unsigned 8-bit uniform sample |
| accumulator | signed 32-bit, 10 fraction bits |

A layer output is `sat8(relu(acc >>> 6))`. The shift truncates; it does not
round. Because p is at most 255/256, a weight with zero variance (p = 1)
cannot be represented exactly.

## Loading parameters

Before the first image, the host writes the parameters through the `pw`
port (`param_wr_t` in `b2n2_pkg`), one write per clock:

- `is_bias = 0`: write (p,q) of layer `layer`, output channel `lane`, at
  entry `addr`. For a convolution the entry is tap·CIN + ci, with taps
  row-major. For the dense layer it is the flattened channel-major index
  (r·4 + c)·128 + ch.
- `is_bias = 1`: set the bias of channel `lane` to `q`.

Every PE ignores writes addressed to other layers.

## Starting the accelerator (`ctrl_regs`)

The control register is an AXI4-Lite slave (`ctl_*` ports), laid out like
the block-control register of a high-level-synthesis block:

| offset 0x00 bit | name | access | meaning |
|-----------------|------|--------|---------|
| 0 | ap_start | R/W | the image input accepts data while this bit is set |
| 1 | ap_done | R, cleared by reading | the logits of an image have left |
| 2 | ap_idle | R | not started, and no image inside the pipeline |
| 3 | ap_ready | R | high in the clock in which an image's last value entered |
| 7 | auto_restart | R/W | keep ap_start set after each image |

There are two ways to start the accelerator:

- **Single shot.** Writing 0x01 lets exactly one image in; ap_start then
  clears by itself.
- **Auto-restart.** Writing 0x81 keeps the input open, so images (or
  Monte-Carlo repeats of one image) can stream continuously.

Writing 0x00 stops the input. While ap_start is clear, `s_ready` stays low.

## Monte-Carlo inference and what the host does

The accelerator produces one set of NCLS logits per pass. For N samples,
the host sends the same image N times. The host is also responsible for
everything else around the RTL:

- converting trained (E,V) parameters into (p,q);
- the softmax;
- averaging the N softmax outputs;
- computing the uncertainty, for example the entropy of the averaged class
  probabilities.

The host processor, the DMA and AXI interconnect, and the DRAM are not part
of this RTL. The top's `s_*` and `m_*` ports connect to a DMA's stream
channels.

## Performance and size at the default parameters

- A convolution PE needs H·W·9·CIN clocks per image. PE 2 is the slowest at
  294,912 clocks, so in steady state the pipeline accepts a new image about
  every 295k clocks (about 1,000 images/s at 300 MHz).
- One image takes 339,516 clocks from the first input value to the last
  logit. This was measured in the full-size test.
- The published accelerator reports 300.4 images/s at 300 MHz. Its
  published description does not say what sets that rate, so the numbers
  cannot be compared in detail.
- Weight memory: 614 KB. The line buffers add about 15 KB.
- The default network has 458 lanes: 448 in the convolutions
  (32+32+64+64+128+128) plus 10 in the dense layer. Each lane has one 8x8
  multiplier, one 32-bit accumulator, one LFSR and one comparator. The
  published implementation uses 465 DSP slices, which is close to one
  multiplier per lane.

## Departures and open points

These points are not fixed by the published description of B2N2. The
choices made here are:

- **Patch order versus loop order.** The published loop nest runs over
  input channels outermost. This RTL instead follows the published
  dataflow diagram: channel-major streams, and patches with the channel
  fastest. Each output pixel is then finished in one pass, and no output-map
  buffer is needed.
- **Padding, stride and pooling.** Zero padding 1 and stride 1 for the
  convolutions, and 2x2/stride 2 for pooling, were inferred from the layer
  sizes.
- **ReLU and bias.** The non-linearity is assumed to be ReLU, and the bias
  is assumed to be deterministic.
- **Arithmetic.** The fraction bits, the 32-bit accumulator, truncation and
  saturation are all choices made here. The original states only "8-bit
  fixed point".
- **URNG.** The LFSR polynomial, width, eight-step advance and seeding are
  choices made here.
- **Parameter storage.** The original compiles the parameters into the
  bitstream. Here each output channel has its own block RAM, loaded through
  a write port.
- **Control register.** The bit layout of the control register is the
  usual HLS layout. It is not taken from the B2N2 publication, which shows
  only the host writing AP_START and AUTO_RESTART.
- **Image boundaries.** The im2col unit does not overlap the end of one
  image with the start of the next.

## Files

- `rtl/b2n2_pkg.sv`: widths, types (`act_t`, `wparam_t`, `param_wr_t`), LFSR step, seeds, requantisation
- `rtl/urng.sv`: LFSR uniform random source
- `rtl/weight_generator.sv`: Bernoulli sampler (URNG, comparator, MUX)
- `rtl/weight_bram.sv`: per-channel (p,q) memory
- `rtl/im2col.sv`: line buffer and patch selector
- `rtl/mm_unit.sv`: lanes of weight memory, weight generator and MAC, plus the output bank
- `rtl/axis_serializer.sv`: bank-to-stream output
- `rtl/conv_pe.sv`, `rtl/maxpool_pe.sv`, `rtl/dense_pe.sv`: the three PE types
- `rtl/ctrl_regs.sv`: AXI4-Lite control register (start, auto-restart, done, idle)
- `rtl/b2n2_top.sv`: the whole network
- `tb/tb_ref_pkg.sv`: integer reference model of the network, including a bit-serial LFSR model
- `tb/tb_<module>.sv`: one self-checking testbench per module
- `tb/tb_b2n2_top.sv`: end-to-end test at reduced size
- `tb/tb_b2n2_top_full.sv`: end-to-end test at full size
- `tb/tb_b2n2_mc_cifar100.sv`: full size with 100 classes and several Monte-Carlo passes

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops. Example with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/b2n2_pkg.sv tb/tb_ref_pkg.sv tb/tb_conv_pe.sv \
        --top-module tb_conv_pe -o sim
    ./obj_dir/sim

Replace `tb_conv_pe` with any other testbench. The `-y` options let
Verilator find the modules that a testbench uses. The two packages are
listed first so that they are compiled before any file imports them.

What the tests cover:

- The unit tests compare against independent models: a bit-serial LFSR, and
  a software convolution, pooling and dense layer. They use random data,
  random gaps on the input and random stalls on the output. They also check
  throughput: one patch element per clock in `im2col` and `mm_unit`, and
  9·CIN clocks per output pixel in `conv_pe`.
- `tb_b2n2_top` runs the whole network at reduced size (8x8x2 input,
  2/3/4 channels, 3 classes). It sends image A, image A again and image B,
  and checks every logit. It checks that the two passes over image A
  differ, and that padding, both Bernoulli outcomes, ReLU clipping,
  saturation, pooling, input back-pressure and output stalls all happen.
  It also drives the control register: the input is held off before the
  start, a single-shot start takes in only one image, and auto-restart
  then streams the remaining images.
- `tb_weight_generator` also checks the central property of the design. It
  sets (p,q) from a target mean and variance, draws 16,000 weights, and
  requires the sample mean and variance to be within 5% of the target.
- `tb_b2n2_top_full` loads all 307,040 random (p,q) pairs and runs one
  32x32x3 image through the default-size design. It checks the ten logits
  against the reference model. It takes a few seconds of simulation after
  about a minute of compilation.
- `tb_b2n2_mc_cifar100` builds the 100-class network at full size and runs
  three passes: a gray image copied onto the three input channels (the way
  a 32x32 MNIST digit is fed), a second Monte-Carlo pass of that image, and
  a colour image. It checks all 300 logits, and checks that the two
  Monte-Carlo passes differ.

In the full-size tests, the random q values are scaled by
1/sqrt(fan-in), so activations stay in range from layer to layer.

The tests use random parameters, not trained ones. They show that the
hardware computes exactly what the model above specifies. They do not
measure classification accuracy.
