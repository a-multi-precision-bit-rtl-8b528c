# SMAC engine: a multi-precision bit-serial convolution accelerator

This is synthesizable SystemVerilog for a small convolution accelerator for
quantized neural networks. It is meant to sit next to a microcontroller core as
a memory-coupled processing engine. The accelerator has no multipliers.
Every multiplication is split into its bit pairs: one weight bit and one
activation bit give one AND gate. A few shift-and-add accumulators put the
full-precision result back together. Precision is therefore a run-time
choice:

* activations: Pa = 8 or 4 bits;
* weights: Pw = 8, 6 or 4 bits;
* both are two's complement.

Narrower data take proportionally fewer cycles on the same hardware. The
datapath is sized for the 8 x 8 worst case:

* 64 Serial-MAC ("SMAC") blocks;
* each block takes M = 16 products per cycle;
* each block holds partial sums for 4 filters;
* one 128-bit memory port.

The architecture follows the published SMAC-engine design, an accelerator
built as a Hardware Processing Engine for the PULPissimo RISC-V platform.
Sizes, block structure and accumulation scheme come from that description.
Where it is silent, this RTL fills the gaps with its own choices: memory
layouts, handshakes, register map and FSM states. They are listed in
[Departures and own choices](#departures-and-own-choices).

## How a product is built from bits

Take one SMAC block and one group of 16 activations `a[i]` and 16 weights
`w[i]` (i = 0..15). The block computes

    y = sum_i a[i] * w[i]
      = sum_{wb} sum_{xb} s(wb) s(xb) 2^(wb+xb) * popcount_i( a[i][xb] & w[i][wb] )

Here `s(b)` is -1 for the most significant (sign) bit of a two's-complement
number and +1 otherwise. The hardware evaluates this sum in three levels:

1. **Bit-serial convolution.** A 16-bit register holds bit `wb` of the 16
   weights: one *bit-plane*. Each cycle, bit `xb` of the 16 activations is
   ANDed with it, and a 16-input adder counts the ones. On the activation
   sign-bit cycle the count is negated. The result is registered.
2. **AC1: activation bits.** Activation bits arrive LSB first. AC1 computes
   `ac1 = (ac1 >>> 1) + (count << (Pa-1))`, so after Pa cycles
   `ac1 = sum_xb s(xb) 2^xb count_xb` exactly. Adding at the top and shifting
   right keeps the register narrow and loses no bits.
3. **AC1 to AC2 register.** After the last activation bit, AC1 is copied into
   a register and negated if the current weight bit is the sign bit.
4. **AC2: weight bits.** `ac2 = (ac2 >>> 1) + (r12 << (Pw-1))` once per
   bit-plane. After Pw bit-planes, AC2 holds the signed 16-term dot product.
   There are four AC2 registers, one per filter *slot*.
5. **AC3: convolution volume.** After the last bit-plane, AC2[slot] is added
   into AC3[slot]. AC3 sums all 16-channel chunks of an f x f x C window.
   There are four AC3 registers.
6. **Quantization and ReLU.** When the window is complete, AC3 is shifted
   right arithmetically one bit per cycle, `qshift` times. This replaces a
   barrel shifter. An output multiplexer then picks a slot, gives 0 if the
   sign bit is set and otherwise the low Pa bits.

One bit-plane of one slot takes Pa cycles. A chunk (16 channels x 4 slots)
takes `4 * Pw * Pa` cycles and performs 4 x 16 MACs. A block therefore does
`16 / (Pa * Pw)` MAC per cycle: 1 at 4 x 4 and 0.25 at 8 x 8.

Each level is its own module: `smac_bsconv`, `smac_ac1`, `smac_ac2` (with the
negating register), `smac_ac3` (with the quantization shift) and `smac_relu`.
`smac` chains them. A bit-cycle presented in cycle n updates AC1 at the end
of n+1, the negating register at n+2, AC2 at n+3 and AC3 at n+4. `smac`
delays the control fields (`smac_ctrl_t`) so each stage sees the fields of
its own data. The controller leaves 4 idle cycles before the first
quantization shift.

## The engine: 64 blocks, shared activations, streamed weights

All 64 blocks see the same 16 activations. Each block works on different
filters: block `s` in slot `t` computes filter `t*64 + s`. One pass over an
input window therefore produces 256 output channels. Activations are loaded
once per chunk and reused for 4 slots x Pw bit-planes. Weights are streamed
continuously: each bit-plane needs 64 x 16 = 1024 bits, that is eight 128-bit
words. At Pa = 8 a bit-plane lasts 8 cycles, so the 128-bit port is exactly
enough. This balance is the reason for the sizes M = 16 and 64 blocks.

`smac_engine` receives one in-order stream of words. For every chunk the
stream holds:

* 1 activation word: 16 byte lanes, one activation each, low Pa bits used;
* `nslot * Pw` bit-planes of 8 words each. Word k of a plane holds blocks
  8k..8k+7, 16 bits per block; bit i multiplies activation i.

A staging buffer collects one bit-plane while the blocks compute on the
previous one. The low-level controller moves the staged plane into the
blocks' weight registers in the same cycle as the last bit-cycle of the
current plane. A newly arrived activation word moves along with it. The
staging buffer accepts a word in that same cycle, so planes follow each other
without a gap whenever the memory keeps up.

Results leave as 4 words per slot. Each word has 16 byte lanes: filter
`t*64 + k*16 + lane` is in word k of slot t.

## A job: programming, loops and memory layout

The host writes the register file over the 32-bit peripheral port, then
writes TRIGGER. A request is granted in its own cycle; the response comes one
cycle later.

| offset | register | contents |
|---|---|---|
| 0x00 | TRIGGER | write: start the job (ignored while busy) |
| 0x04 | STATUS | bit 0 busy; bit 1 a job finished since the last read (cleared by the read) |
| 0x08 / 0x0C / 0x10 | ACT_BASE / W_BASE / OUT_BASE | byte addresses, 16-byte aligned |
| 0x14 | PREC | [3:0] Pa, [7:4] Pw |
| 0x18 | NSLOT | [2:0] slots in use, 1..4 (64 filters each) |
| 0x1C | CH_WORDS | [15:0] input channels / 16 |
| 0x20 | KSIZE | [1:0] kernel side f, 1..3 |
| 0x24 / 0x28 / 0x2C | W_IN / H_OUT / W_OUT | [15:0] input width, output rows, output columns |
| 0x30 | QSHIFT | [4:0] quantization shift |
| 0x34 | NGROUP | [7:0] filter groups per pixel, NSLOT x 64 filters each (0 counts as 1) |

Writes are ignored while the job runs. `evt` pulses when the last result has
been written.

The convolution is "valid" (no padding) with stride 1. Input padding, if
needed, is laid out in memory. Loop order, outermost first:

    for h < H_OUT, w < W_OUT                  output pixel
      for g < NGROUP                          filter group (one pass)
        for l < f, j < f, c < CH_WORDS        chunk: kernel position, 16-channel group
          read activation word  (h+l, w+j, c)
          for t < NSLOT, wb < Pw              slot, weight bit (LSB first)
            read 8 weight words; run Pa bit-cycles (LSB first)
        drain, quantize, write NSLOT x 4 result words

Memory layouts (word = 16 bytes):

* **activations:** word `((y * W_IN + x) * CH_WORDS + c)` from ACT_BASE. Byte
  i is channel 16c + i (channels innermost).
* **weights:** bit-planes in the order they are used. For group g, chunk
  (l, j, c), slot t and bit wb, the plane starts at word
  `g * G + ((((l*f + j) * CH_WORDS + c) * NSLOT + t) * Pw + wb) * 8` from
  W_BASE, where `G = f*f*CH_WORDS*NSLOT*Pw*8` is the size of one group. The
  same block of weights is read again for every output pixel, so the host
  arranges it once per layer.
* **outputs:** word `(((h * W_OUT + w) * NGROUP + g) * NSLOT + t) * 4 + k`
  from OUT_BASE. Byte `lane` holds filter `(g*NSLOT + t)*64 + k*16 + lane`,
  zero-extended from Pa bits. With NSLOT = 4 the output channels of a pixel
  are therefore contiguous and in filter order.

A layer with more than 256 filters is split into filter groups inside one
job. Each group is a full pass over the pixel's input window, so the
activations are read once per group. The low-level controller does not know
about groups: it sees one pass after another.

## Control and memory interface

* `smac_regfile` holds the job and produces the start pulse.
* `smac_hl_ctrl` (high-level control) generates every load address in
  consumption order, and consecutive store addresses. It counts write
  acknowledges to find the end of the job.
* `smac_ll_ctrl` (low-level control) is a six-state FSM: idle, wait-for-plane,
  compute, drain, quantize, output. Counters for activation bit, weight bit,
  slot, chunk and pixel drive the SMAC control fields.
* `smac_load_unit` turns addresses into TCDM reads. It holds one credit per
  free entry of the input FIFO, so returning data always fit.
* `smac_store_unit` pairs result words with store addresses.
* `smac_tcdm_mux` shares the single memory port between loads and stores
  (round robin). It forwards read data only for reads.
* `smac_fifo` (depth 4) sits on each stream between the memory side and the
  engine.
* `smac_hwpe` is the top and wires all of these together.

The TCDM protocol is simple. `req` with address, write enable and data is
held until `gnt`. A granted read returns `r_data` with `r_valid` one cycle
later. Responses to writes are ignored.

Concurrent assertions state the interface rules and fire in simulation with
`--assert`:

* an offered load or store address stays offered and unchanged until taken;
* the memory port grants at most one side, and only a side that asked;
* the input FIFO always has room for returning read data;
* no FIFO holds more than its depth;
* quantization shifts never overlap a bit-cycle.

## Performance

Per output pixel, the job takes about

    ngroup * (chunks * (nslot * Pw * max(Pa, 8) + 1) + 4 + qshift + 4 * nslot + ~10) cycles

The +1 is the activation word of each chunk. The max(Pa, 8) is the time to
stream one bit-plane through a 128-bit port. The slice of a 3x3, 128-in,
128-out layer in `tb_vgg_conv_layer` measures:

| Pa, Pw | cycles / pixel (this RTL) | published layer total / 12544 pixels | MAC / cycle |
|---|---|---|---|
| 8, 8 | 9319 | 9373 | 15.8 |
| 8, 6 | 7013 | 7069 | 21.0 |
| 8, 4 | 4707 | 4697 | 31.3 |
| 4, 4 | 4699 | 2459 | 31.4 |

At Pa = 4, Pw = 4 the published figure needs a new bit-plane every 4 cycles,
which is 256 bits per cycle. The same description also fixes the memory port
at 128 bits per cycle. This RTL keeps the 128-bit port, so at Pa = 4 the SMAC
blocks wait half the time and the rate is the Pa = 8 one. A wider port
(BUS_W) would restore the rate, but then the 16-lane activation word no
longer fills one bus word. That needs layout changes that are not made here.

## Departures and own choices

* **Pa = 4 rate:** see above. This is the one published number the RTL does
  not reach.
* **Filters beyond 256:** split by the hardware into up to 255 filter groups
  per job, with all groups of a pixel processed before the next pixel. The
  published design splits too, but does not say where in the loop nest.
* **Kernels beyond 3x3, strides other than 1, padding:** none of these is
  handled by the hardware. The host lays out padding in memory and
  decomposes larger kernels or strided layers. The 3x3 limit matches the
  published design; stride and padding are not described there.
* **Result format:** ReLU, then the low Pa bits with no saturation. Choosing
  QSHIFT so that results fit is the host's job. A result of 2^(Pa-1) or more
  reads as negative if it is fed back as a signed activation.
* **Sign handling:** the activation sign bit is handled by negating the
  popcount, and the weight sign bit by negating AC1. The published
  description states the second; the first is this design's reading.
* **Accumulator widths:** AC1 14, AC2 22 and AC3 32 bits. AC3 holds sums of
  up to 25088 products of 8 x 8 bits, enough for VGG16's first fully
  connected layer.
* **FSM:** the published low-level FSM has 16 states. This one has 6 and
  covers the same loops.
* **Stream, layouts, register map, FIFO depth (4), credits, round-robin
  arbitration, single clock domain:** all of these are this implementation's
  choices.
* **Observation ports:** `busy`, `stall_weights` and `tcdm_conflict` on the
  top are for profiling. They are not part of the published interface.

## Workloads

* **VGG16** convolution and fully connected layers fit the hardware. The first
  layer's 3 input channels are zero-padded to 16. Layers with 512 or 4096
  filters run as 2 or 16 filter groups. Fully connected layers run as 1x1
  convolutions with up to 1568 channel groups.
* **SqueezeNet** fire modules and conv10 fit; conv10 (1000 filters) runs as
  4 groups of 256, with 24 filter lanes unused.
* **SqueezeNet conv1** (7x7, stride 2) does not run directly. It must be
  decomposed in software.

`tb_cnn_workloads` runs one job of each of these layer shapes at full size,
with the real channel and filter counts. Two layers are cut: the 25088-input
layer to 64 filters and the 4096-input layer to one group, so that their
weights fit the simulated memory. It checks every output byte and prints the
rate:

| layer (one pixel or a short strip) | Pa, Pw | MAC / cycle |
|---|---|---|
| VGG16 conv 3x3, 256 -> 512 (2 groups) | 8, 4 | 31.7 |
| VGG16 conv 3x3, 512 -> 512 (2 groups) | 8, 6 | 21.2 |
| VGG16 fc 25088 -> 64 | 8, 8 | 15.8 |
| VGG16 fc 4096 -> 256 | 4, 4 | 31.7 |
| SqueezeNet fire expand 3x3, 16 -> 64 | 8, 8 | 15.3 |
| SqueezeNet conv10 1x1, 512 -> 1000 (4 groups) | 8, 8 | 15.5 |
| SqueezeNet fire squeeze 1x1, 128 -> 16 | 4, 4 | 7.4 |
| VGG16 conv1 3x3, 3 -> 64 | 8, 8 | 2.9 |

The rate depends only on the precisions while all 64 x 4 filter lanes and
16 channel lanes carry real data. It falls when they do not. A squeeze layer
with 16 filters uses 16 of 64 blocks. VGG16 conv1 uses 3 of 16 channel lanes,
and one pixel of it is short enough that the per-pixel overhead also counts.

The memory holding a layer belongs to the host system. Tiling a layer into
that memory is the host's job.

## Files

`rtl/` holds one module or package per file:

* `smac_pkg.sv`: constants, the SMAC control struct, the job configuration
  struct;
* `smac.sv`: one Serial-MAC block, built from `smac_bsconv.sv` (AND gates
  and adder), `smac_ac1.sv`, `smac_ac2.sv`, `smac_ac3.sv` (accumulators and
  quantization) and `smac_relu.sv`;
* `smac_engine.sv`: 64 blocks with the stream loader and output assembly;
* `smac_ll_ctrl.sv`, `smac_hl_ctrl.sv`, `smac_regfile.sv`: control;
* `smac_load_unit.sv`, `smac_store_unit.sv`, `smac_tcdm_mux.sv`, `smac_fifo.sv`:
  streamer and FIFOs;
* `smac_hwpe.sv`: top.

`tb/` holds a self-checking testbench per module (`tb_<module>.sv`), a
behavioural TCDM model with random grants (`tcdm_model.sv`), and
`tb_vgg_conv_layer.sv` (the layer slice of the performance table) and
`tb_cnn_workloads.sv` (the network layers above). Every testbench prints
`TB_RESULT checks=N failures=M`.

`tb_smac_hwpe` runs the top at its full default size. It covers six jobs over
all precision pairs, 1 to 4 slots, 1 to 3 filter groups and 1x1 to 3x3
kernels, with memories that
refuse requests at random. It checks every output byte against an integer
convolution, checks the job time, and counts that each mechanism happened:
weight stalls, port conflicts, refused requests, quantization, ReLU clipping,
multi-chunk volumes, four-slot jobs, split jobs and each precision.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_smac_hwpe \
        -Irtl -Itb -y rtl -y tb rtl/smac_pkg.sv tb/tb_smac_hwpe.sv
    ./obj_dir/Vtb_smac_hwpe

Substitute any other testbench name. Every testbench finishes in seconds.
Lint a module with

    verilator --lint-only -Wall -Irtl -y rtl rtl/smac_pkg.sv rtl/smac_hwpe.sv

The remaining lint warnings are unused bits: package constants, the upper
control fields at the last pipeline stage, the FIFO fill counts, and the
low-level `done`, which the top does not need because it ends the job on the
last write acknowledge. `tcdm_be` is constant all-ones because only whole
words are written. `periph_gnt` equals `periph_req`. Verilator also notes that the
asynchronous reset is read as a plain signal: that is the assertions'
`disable iff (!rst_n)`, which is simulation-only.

To change the size, the parameters are `NUM_SMAC_P` on `smac_hwpe` (a
multiple of 8) and `FIFO_DEPTH`. The package constants M, BUS_W and LANE_W
are tied together: one activation word must be exactly M byte lanes of
BUS_W bits.
