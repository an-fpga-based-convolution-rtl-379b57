# Weight-stationary convolution accelerator for 8-bit CNN layers

This is synthesizable SystemVerilog for an FPGA convolution accelerator. It is meant to sit next to
an embedded processor in a system-on-chip. The processor and a DMA engine load an input feature map
and a set of kernels into on-chip buffers. The accelerator then computes the 2-D convolution

    O(p, q, m) = sum over c, r, s of  I(p + r, q + s, c) * F(c, r, s, m)

and leaves the results in an output buffer for the DMA to read back.

The core's main idea is a **line of Kernel-Channel Processing Engines (KCPEs)** with
**weight-stationary** dataflow:

- A KCPE is a K x J grid of multiply-accumulate Processing Elements (PEs): K kernels by J input
  channels. Each PE keeps one weight in a local register.
- The core has E KCPEs side by side. KCPE `e` holds the weights of kernel column `s = e` of one
  kernel row.
- Weights are loaded once. The whole input map then streams past them, one pixel (J channels) per
  cycle, before the next group of weights replaces them.

Each clock cycle the core does E·K·J multiply-accumulates. With the default E = 3, K = 4, J = 3
that is 36 MACs per cycle: 3x3 kernels, 4 output channels and 3 input channels at once.

## How a convolution is mapped onto the line of KCPEs

This part takes the most thought, so here it is step by step.

**One pass.** A pass fixes three things: a kernel group (K kernels), a channel group (J channels)
and one kernel row `r`. During the pass:

1. *Weight load.* The weight buffer sends three 96-bit words, one per cycle. Word `s` holds the
   K x J weights `F(c, r, s, m)` of kernel column `s`, and goes into KCPE `s`.
2. *Streaming.* Input rows `r .. r+P-1` of the channel group come out of the input buffer one
   pixel per cycle, in raster order. Each pixel shifts into a 3-pixel window. KCPE `e` sees window
   slot `e`.
   - Once a row has delivered at least 3 pixels, pixel `x` closes the window of output column
     `q = x - 2`.
   - At that point the three KCPE outputs, added per kernel, are the contribution of kernel row
     `r` and the J channels to output `(p, q)` of the K kernels.
   - The first two pixels of each row only fill the window. Their results are marked as not
     emitted.
3. *Accumulate.* The psum accumulate router adds the K contributions into the output word of
   `(p, q)`, which lives in the output buffer.
   - The first pass of a kernel group (channel group 0, row 0) writes the word directly.
   - Every later pass reads the word, adds to it and writes it back.
4. *Drain.* The controller waits 6 cycles, until the last result is written. Only then can new
   weights enter the PEs.

**The loop nest.** Passes run with the kernel group outermost, then the channel group, then the
kernel row. A layer with C channels, M kernels and R kernel rows takes `(M/K)·(C/J)·R` passes.

**Addresses.**
- Weight words are stored in pass order.
- The input pixels of one pass are contiguous.
- The outputs of one pass are written in order.

So every buffer address is a running counter, and the sequencer has no multipliers. The host
supplies the two products it needs, H·W and P·Q, through registers.

**Pipeline.** The controller issues a buffer read in cycle `t`. The data arrives in `t+1` and
enters the window. Then come the PE product register, the KCPE column-sum register and the
per-kernel sum register, so the engine's result is valid in `t+5`. That is 4 cycles from pixel to
partial sum, the published `n_delay`. A small tag travels down the pipeline with each pixel. It
carries three fields:

- whether the pixel closes a window;
- whether this is the first contribution;
- the output word address.

The accumulator needs nothing but the tag.

## Arithmetic and data formats

| quantity | width | notes |
|---|---|---|
| activation, weight | 8 bits, unsigned | one PE multiplies them |
| PE / KCPE / engine partial sum | 16 bits | wraps modulo 2^16 |
| stored output | 8 bits per kernel, 4 kernels per 32-bit word | exact sum modulo 256 |

The accumulator keeps the low 8 bits of each partial sum. The additions into the output buffer are
also modulo 256. Each output lane therefore holds the exact convolution sum modulo 256, whatever
the size of the layer. If a quantised network needs a different rescaling (a shift, saturation,
requantisation), it belongs in `psum_accum_ctrl`, where `in_pack` is formed.

Packing, chosen to match the published simulation waveform:
- Input word: channel `j` of a pixel is in bits `[8j+7:8j]`. The top 8 bits of the 32-bit word are
  unused.
- Weight word (96 bits): the weight of kernel `k`, channel `j` is byte `k*J + j`.
- Output word (32 bits): kernel `k` of the group is byte `k`.

## Buffer layouts

| buffer | default size | word | word address |
|---|---|---|---|
| input global buffer | 256 KB = 65536 words | 32 bits: one pixel, J channels | `(cg*H + y)*W + x` |
| weight global buffer | 32 KB = 2730 words | 96 bits: one KCPE's weights | `((kg*(C/J) + cg)*R + r)*3 + s` |
| output global buffer | 512 KB = 131072 words | 32 bits: one pixel, K kernels | `kg*P*Q + p*Q + q` |

In the table, `cg` is the channel group, `kg` the kernel group, `P = H - R + 1` and `Q = W - 2`
(stride 1, no padding). All buffers read with one cycle of latency. The output buffer has a separate
read port and write port, so the accumulator can read one word while it writes another.

## Using it: registers and the host sequence

The register port is a plain strobe interface: `reg_wr` / `reg_rd`, a byte address, 32-bit data.
Read data is registered.

| offset | name | contents |
|---|---|---|
| 0x00 | CTRL | bit 0: start (write 1, ignored while busy); bit 1: soft reset (level, ORed with `rst`) |
| 0x04 | STATUS | bit 0 busy, bit 1 done, bit 2 output overflow, bit 3 configuration error (bits 1-3 are sticky and cleared by the next start) |
| 0x08 | INPUTSHAPE | `[31:16]` H, `[15:0]` W |
| 0x0C | INPUTRSTCNT | H*W (input words per channel group) |
| 0x10 | KERNELSHAPE | `[31:16]` M, `[15:0]` C |
| 0x14 | KERNELSIZE | `[31:16]` R, `[15:0]` S |
| 0x18 | OUTPUTSIZE | `[31:16]` P, `[15:0]` Q |
| 0x1C | WEIGHTINTERVAL | P*Q (output words per kernel group) |

A run goes like this:

1. Write the input and weight buffers through `ib_*` / `wb_*`.
2. Write the six shape registers.
3. Write CTRL = 1.
4. Wait for the `irq_done` pulse, or poll STATUS.
5. Read the results through `ob_*`. The DMA gets the output buffer's read port whenever the core is
   idle.

The core runs only these shapes:
- S = 3 (the number of KCPEs);
- C a multiple of 3 and M a multiple of 4;
- R ≥ 1 and P ≥ 1;
- W ≥ 3.

A run with S ≠ 3, W < 3, or any of R, P, C, M equal to zero ends at once with STATUS bit 3 set.
The multiples of C and M are not checked. Pad unused channels or kernels with zeros in the
buffers.

**Layers whose outputs do not fit.** When `(M/4)·P·Q` is larger than the output buffer, results
past the end are dropped and STATUS bit 2 is set. The host should split the kernels into runs that
fit. Between runs it loads each run's weights from word 0 and drains the output buffer. The
testbenches do exactly this for the 16-kernel case below.

## Timing and performance

A run is busy for `passes·(3 + P·W + 6) + 1` cycles, where `passes = (M/4)·(C/3)·R`. Almost all of
it is the streaming term. For S = 3 it matches the published performance model
`H·W·C·M·R·S / (E·K·J) + n_delay`, with P in place of H.

Simulated on a 224x224x3 image with 3x3x3 kernels:

| kernels M | cycles | time at 300 MHz | model cycles | outputs fit? |
|---|---|---|---|---|
| 4 | 149 212 | 0.50 ms | 150 532 | yes (49 284 of 131 072 words) |
| 8 | 298 423 | 0.99 ms | 301 060 | yes (98 568 words) |
| 16 | 596 845 | 1.99 ms | 602 116 | no (197 136 words): two runs of 8 |

These are core cycles only. They do not include loading the buffers or reading results back.

## Modules

```
conv_accel_top            system subsystem: registers, three buffers, core
├── conv_regfile          configuration / status registers, start pulse, soft reset
├── input_global_buffer   256 KB simple dual-port RAM
├── weight_global_buffer  32 KB simple dual-port RAM, 96-bit words
├── output_global_buffer  512 KB RAM, separate read and write ports
└── conv_ip_core          the convolution core
    ├── conv_controller           pass sequencer and address generator
    ├── line_kcpe_conv2d_engine   input window + E KCPEs + per-kernel adders
    │   └── conv_kcpe (x E)       K x J PE grid
    │       └── conv_pe (x K·J)   stationary weight, multiply, column add
    └── psum_accum_ctrl           read-modify-write accumulation into the output buffer
conv_pkg                  shared constants, register map, config struct, pipeline tag
```

The processor, the DMA engine, the DDR memory and the AXI interconnect of a complete system are not
part of this RTL. Their connections are the top's ports. Every module in `rtl/` begins with a
comment that gives its interface and timing.

## Simulating

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/conv_pkg.sv tb/tb_conv_accel_top.sv \
          --top-module tb_conv_accel_top -Mdir obj && ./obj/Vtb_conv_accel_top
```

Replace the testbench name to run another one.

- `tb_conv_accel_top` runs the whole subsystem at small buffer sizes. It makes every mechanism
  happen at least once and counts each: several kernel and channel groups, direct writes and
  read-modify-writes, an output overflow followed by a split into several runs, a soft reset in
  the middle of a run, a configuration error and the done interrupt.
- `tb_conv_accel_full` uses the default sizes. It runs the 224x224x3 workload with 4, 8 and 16
  kernels and checks every output word and each run's cycle count. It takes about 20 seconds.
- `tb_conv_ip_core`, `tb_conv_controller` and the smaller testbenches check their blocks against
  independent models. `tb_line_kcpe_conv2d_engine` includes a vector taken from the published
  waveform: weight 151 on three channels with pixel (90, 141, 23) gives 38354.

## What this design adds to the source description, and how far to trust it

The source describes these parts:
- the dataflow;
- the KCPE and PE structure;
- E = 3, K = 4, J = 3;
- 8-bit MACs;
- the 4-cycle latency;
- the buffer sizes;
- the names and widths of the core's ports.

The following are this design's own choices:

- **Sequencing.** The loop order, the buffer layouts, the drain between passes, and a separate
  controller that tags pixels with output addresses. The source's engine derives addresses from
  its configuration inputs and requests data with handshakes instead.
- **Registers.** The register fields and offsets, the STATUS register and the configuration check.
  The published schematic gives only the configuration registers' names and their 32-bit width.
- **Output width.** Keeping the low 8 bits of each 16-bit partial sum. The source shows a 16-bit
  engine output feeding 8-bit accumulator inputs without saying which bits are kept. Expect to
  change this for a real quantised network.
- **Shapes.** Stride 1, no padding, S = 3, unsigned operands.
- **Run-time configuration.** Layer shapes are set at run time through registers. The source's own
  implementation also used Verilog parameters for them.
- **Out-of-range outputs.** Outputs past the buffer are dropped and flagged.

Verification covers every block on its own, the core and the subsystem at small sizes with random
data, and the full-size published workload. All outputs are compared with a direct evaluation of
the convolution. The design has not been placed and routed here, so the published 300 MHz clock is
not confirmed for this RTL.
