# iMAC: an im2col + multiply-accumulate convolution accelerator

A convolution layer is usually fed to matrix-multiply hardware after an
*im2col* step, which copies every K x K input window into its own column.
For a 3x3 kernel that is nine times the input data, and all of it must be
stored and moved over the DMA. The iMAC accelerator avoids the copies. It
receives each input feature map once, into an on-chip input BRAM, and
generates the windows itself, tap by tap, while eight processing elements
(PEs) multiply and accumulate. Only im2col and the multiply-accumulate are
in hardware. Bias addition and activation stay on the host CPU, which does
them for output channel N-1 while the accelerator computes output
channel N.

The arithmetic is IEEE-754 single precision throughout. The RTL is
parameterised for 8 PEs, a 50,176-word input BRAM (one 224x224 map), a
288-word weight BRAM and a 50,176-word output BRAM. The intended target is a
small FPGA SoC such as a Zynq-7020 at about 90 MHz.

## What one run computes

One run of the accelerator produces **one output channel, from the slice of
input channels that fits in its memories**:

    out[y][x] (+)= sum over c in slice, sum over (kr,kc) of
                   in[c][y+kr-PAD][x+kc-PAD] * w[c][kr][kc]

Stride is 1, and inputs outside the map are zero. The output is
(H+2·PAD-K+1) x (W+2·PAD-K+1). With FIRST set, the run overwrites the
output BRAM. Without it, the run adds to what the previous run left there.
A whole layer is therefore a loop on the host:

    for each output channel o:
        for each partition j of the input channels:
            write registers; CTRL = ARM | (j==0 ? FIRST : 0)
            DMA weights of (o, j), then input maps of j   -> starts by itself
            (first partition only: bias + activation of channel o-1 on the CPU)
            poll STATUS.DONE
        CTRL = READOUT; DMA the output channel to memory

The number of input channels per run is bounded by both memories:
`min(floor(50176 / (H·W)), floor(288 / (K·K)))`. For a 112x112 map this is
4 channels, so a 12-channel layer takes 3 partitions.

There is no double buffering. Loading a partition and computing on it do not
overlap. What runs in parallel is the CPU's back end (bias, activation) with
the accelerator's front end (transfers, im2col, MAC).

## How the windows are generated: lanes, banks and taps

This is the heart of the design.

**Lanes.** The eight PEs compute eight horizontally neighbouring outputs of
one output row, `(y, x0) … (y, x0+7)`: a *column group*. All of them use the
same weight at the same time, so the weight BRAM has a single read port
whose word is broadcast. Groups never straddle rows. In the last group of a
row, lanes past the row end are disabled and do not write.

**Taps.** For a group, the im2col unit (`im2col_fu`) issues the K·K kernel
taps one per cycle, in row-major order (kr, kc) = (0,0), (0,1) … (K-1,K-1).
For tap (kr, kc) lane p needs input `(y+kr-PAD, x0+p+kc-PAD)`. These are
eight *consecutive* words of the row-major map, starting at
`base = ch_base + (y+kr-PAD)·W + x0+kc-PAD`. The unit issues that base
address together with:
- a padding mask, for lanes whose input lies outside the map;
- the lane enables;
- the weight address `c·K·K + kr·K + kc`;
- first/last-tap flags;
- the output address `y·Wo + x0`.

The base can be negative at the top border, which is why the address is
signed.

**Banks.** The input BRAM is split into 8 banks, word i in bank i mod 8.
Any 8 consecutive addresses fall into 8 different banks. Each bank works out
which lane wants it (`(bank - base) mod 8`), reads one word, and a rotation
puts the words back in lane order. One cycle therefore delivers a full tap
for all PEs, whatever the alignment. Lanes whose address lies outside the
memory read 0, and padding lanes are forced to 0 in the PE anyway. The
output BRAM is banked the same way, so a group's eight results are read and
written in one cycle each.

**1x1 kernels (im2col bypass).** With K=1 and no padding there is nothing to
unroll. The unit then ignores rows and walks the channel as one vector,
8 words per cycle. A 14x14 map then takes 25 cycles instead of 28.

Example: a 5x5 map holding 1…25, a 3x3 kernel of ones and padding 1. Two
lanes working on outputs (0,0) and (0,1) see the tap pairs
(0,0) (0,0) (0,0) (0,1) (1,2) (2,3) (0,6) (6,7) (7,8), and the window sums
are 16 and 27. `tb_im2col_fu` and `tb_imac_top` check exactly this.

## The processing element

Each PE (`imac_pe`) is a six-stage pipeline that accepts one tap per cycle:

| stage | register      | operation |
|-------|---------------|-----------|
| s0    | tap tags      | input and weight BRAMs read |
| s1    | Im2colBuffer  | input word, or +0 for a padding tap; weight |
| s2    | MulBuffer     | Im2colBuffer × weight (`fp32_mul`) |
| s3    | OutBuffer     | MulBuffer on the first tap, else OutBuffer + MulBuffer (`fp32_add`) |
| s4    |               | after the last tap: read the output BRAM word |
| s5    |               | write OutBuffer + word (`fp32_add`), or OutBuffer alone on the first channel of a FIRST run |

Output words of one channel are all different, and the im2col unit leaves
one idle cycle between channels. An s4 read therefore never hits the word
that s5 is writing in the same cycle; an assertion in `imac_pe` checks this.
All PEs run in lockstep, and the top takes the common read/write address
from PE 0.

## Programming interface

Register port (`reg_we`, `reg_addr[2:0]`, `reg_wdata`, combinational
`reg_rdata`). Configuration writes are ignored while a run is in progress.

| addr | name   | access | meaning |
|------|--------|--------|---------|
| 0    | CTRL   | W      | bit0 ARM: expect weights + inputs, then compute; bit1 FIRST: overwrite the output BRAM; bit2 READOUT: stream the output channel out |
| 1    | STATUS | R      | bit0 DONE (set at the end of a run, cleared by ARM), bit1 BUSY, bit2 readout busy |
| 2    | HEIGHT | RW     | H, input rows |
| 3    | WIDTH  | RW     | W, input columns |
| 4    | NCH    | RW     | input channels in this run |
| 5    | KSIZE  | RW     | K (1…15) |
| 6    | PAD    | RW     | zero padding |

**Input stream** (`s_valid`/`s_ready`/`s_data`, one fp32 word per cycle).
After ARM the loader expects NCH·K·K weights, ordered channel by channel and
within a channel row by row. It then expects NCH·H·W input words, ordered
channel by channel and row by row. `s_ready` is low outside an armed
transfer. Computation starts in the cycle after the last input word, with no
further command.

**Output stream** (`m_valid`/`m_ready`/`m_data`/`m_last`). READOUT sends
the Ho·Wo output words row by row, one per cycle when `m_ready` is held
high, with `m_last` on the final word.

## Timing

From the last input word to DONE a run takes

    NCH · (T + 1) + 7 cycles,  T = Ho · ceil(Wo/8) · K·K     (K > 1 or PAD > 0)
                               T = ceil(H·W/8)               (1x1 bypass)

The +1 is the idle cycle between channels and the 7 is pipeline latency.
Loading takes one cycle per word and readout one cycle per word. Examples:
- A 224x224, 3x3 channel is 56,449 cycles, about 0.63 ms at 90 MHz.
- All convolution layers of Tiny-Darknet (224x224x3 input) are about 66 M
  compute cycles, about 0.73 s at 90 MHz before transfers. Every layer of
  that network fits the default memories.

## Numbers

`fp32_mul` and `fp32_add` are combinational IEEE-754 binary32 units with
round-to-nearest-even. They differ from full IEEE behaviour only at the
edges:
- Subnormal operands are treated as zero.
- Subnormal results are flushed to zero.
- Overflow gives infinity.
- NaN, inf·0 and inf−inf give the quiet NaN 0x7fc00000.
- An exact cancellation gives +0.

The accumulation order is fixed (taps in order, then channels in order, then
partitions in order), so results are bit-reproducible. They are not the same
as a dot product rounded once.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `imac_top` | `NUM_PE` | 8 | lanes; must be a power of two |
| `imac_top` | `IN_DEPTH` | 50176 | input BRAM words (one 224x224 map) |
| `imac_top` | `W_DEPTH` | 288 | weight BRAM words |
| `imac_top` | `OUT_DEPTH` | 50176 | output BRAM words (one 224x224 output channel) |

Register fields are 16 bits wide (H, W, NCH) and 4 bits wide (K, PAD). The
host must keep NCH·H·W ≤ IN_DEPTH, NCH·K·K ≤ W_DEPTH and
Ho·Wo ≤ OUT_DEPTH. The hardware does not check these limits.

## Where this RTL is its own design

The architecture follows a published accelerator:
- PE structure: Im2colBuffer, multiplier, MulBuffer, OutBuffer, and an adder
  into the output BRAM.
- Eight PEs on neighbouring output columns.
- Start on arrival of the inputs, with a polled done flag.
- Partitioning of input channels over runs.
- Bias and activation on the CPU.
- No double buffering.
- 32-bit floats.

The following are choices made here, not taken from that description:
- Memory banking and lane rotation.
- Tap order per cycle and the one-cycle channel gap.
- Register map, stream handshakes and the FIRST/overwrite mechanism for
  starting a new output channel.
- Output BRAM depth.
- Floating-point rounding and subnormal rules.
- Stride fixed at 1.

Known limits:
- **Timing closure.** The floating-point units are single-cycle
  combinational logic. A real 90 MHz FPGA build would need them pipelined,
  with the OutBuffer accumulation reorganised (for example, interleaving
  several windows per PE) to hide the adder latency.
- **Outside this RTL.** The DMA engine, main memory and the CPU software
  (partitioning loop, bias, activation) are not part of it. The testbench
  plays their role.
- **Stride.** Only stride 1. A larger stride would make lanes collide in
  the input banks.

## Files

`rtl/`:
- `imac_pkg.sv`: shared types (fp32 word, layer configuration struct) and
  the register map.
- `imac_top.sv`: the accelerator.
- `imac_ctrl.sv`: registers and run sequencing.
- `stream_loader.sv`, `stream_unloader.sv`: DMA stream ports.
- `input_bram.sv`, `weight_bram.sv`, `output_bram.sv`: the on-chip memories.
- `im2col_fu.sv`: the window/tap generator.
- `imac_pe.sv`: processing element.
- `fp32_mul.sv`, `fp32_add.sv`: floating-point units.

`tb/`:
- `tb_<module>.sv`: one self-checking bench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb_fp_pkg.sv`: the reference float conversions the benches use. Products
  and sums are computed in double precision and rounded once to single,
  which gives the correctly rounded result.

`tb_imac_top` runs the accelerator at its default size. It covers:
- the 5x5 example;
- a 3x3 layer split into two partitions;
- a 1x1 layer;
- a 5x5 kernel;
- a full 224x224x3 → 1 output channel in three partitions.

It compares every output word with a reference convolution in the
hardware's order of operations, checks the cycle count of every run, and
counts that each mechanism occurred: padding, bypass, partial groups,
overwrite, accumulate, automatic start, input gaps and output back-pressure.
It runs in about a second of simulation time after a half-minute build.

`tb_imac_workloads` runs one output channel of each of several layer shapes
at the default size. Each layer is split into as many runs as the memories
require:
- a 112x112x12 3x3 layer in 3 runs of 4 channels, followed by a second
  output channel;
- Tiny-Darknet shapes 56x56x32 1x1, 28x28x32 3x3, 14x14x64 3x3 and
  14x14x128 1x1.

Every output word is checked.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/imac_pkg.sv tb/tb_fp_pkg.sv tb/tb_imac_top.sv \
        --top tb_imac_top -o sim
    ./obj_dir/sim

Replace `tb_imac_top` with any other `tb_*` bench. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/imac_pkg.sv rtl/imac_top.sv --top imac_top`.
