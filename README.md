# Block-pruned CNN inference accelerator

Most of the weights of a classic CNN such as AlexNet sit in its dense (fully
connected) layers. Each weight is used once per image, so those layers are
limited by memory bandwidth, not by arithmetic. Pruning removes most of those
weights, but ordinary pruning leaves a scattered sparse matrix. A parallel
8-wide datapath cannot use such a matrix without a complex dispatch unit.

This accelerator prunes in **blocks** instead. A dense kernel is cut into
blocks of `BS` consecutive weights, and each block is either kept whole or
dropped. Each kept block is stored as:

- its `BS` weights, packed into 64-bit words;
- a 4-bit **relative index**: how many blocks it lies after the previous kept
  block.

A small address generator turns the indexes back into batch-memory read
addresses. In every cycle, a core therefore multiplies eight stored weights
with exactly the eight activations they belong to, and no cycle is spent on a
pruned weight.

The dense layers also work on a **batch** of images: every weight word fetched
is used by every image of the batch. Pruning and batching together let a
small FPGA keep its dense layers fed from the same external bandwidth.

The convolutional layers are not pruned. They run on a separate, dense
convolution engine that treats every convolution as one long dot product.

All data is 8-bit signed fixed point. Accumulators are 32 bits. Every memory
and datapath moves 64-bit words of eight values.

The default sizes are those of the main configuration, for a Zynq-7020 class
device with block size 8 and 90% pruning:

- 16 × 7 convolution cores;
- 1 × 2 dense cores: one kernel at a time, on a batch of two images.

## Organisation

```
 processor bus ──► controller ──► layer configuration, start, status, irq
                       │ route table
 DMA read channels ──► dma_switch ─┬─► conv FMMs ┐
  (4 x 64-bit streams)             ├─► conv weight memories ─► conv_module ──► conv_out_* (per line)
                                   ├─► FC batch memories ┐
                                   └─► FC kernel stream ─┴──► fc_module ──► fc_out_* (per batch line,
                                                                            also written back to the
                                                                            batch memories)
```

The two compute modules are independent. Each runs one layer, or one part of
a layer, at a time, set up from configuration registers. A layer runs in
these steps:

1. The processor writes the layer's configuration.
2. DMA streams are routed through the switch to load input maps and kernels.
3. A start command is issued.
4. The results stream out.

The processor, the DMA engines and the external memory are not part of the
RTL. The top module `cnn_accel_top` exposes their bus and streams as ports.

| file | role |
|---|---|
| `cnn_pkg.sv` | shared widths, `dma_beat_t` (line, address, data), `conv_cfg_t`, `fc_cfg_t` |
| `pe_core.sv` | one core: 8 signed 8×8 multipliers, adder tree, 32-bit accumulator |
| `shift_relu.sv` | fixed-point scale (arithmetic right shift with rounding), ReLU, saturation to 8 bits |
| `conv_addr_gen.sv`, `conv_cluster.sv`, `conv_srp.sv`, `conv_module.sv` | convolutional module |
| `index_fifo.sv`, `fc_addr_gen.sv`, `fc_index_loader.sv`, `batch_mem.sv`, `fc_out_pack.sv`, `fc_module.sv` | dense module with block pruning |
| `sdp_ram.sv` | simple dual-port RAM with registered read, used for weight memories and FMMs |
| `dma_switch.sv`, `controller.sv` | interconnect and configuration registers |
| `cnn_accel_top.sv` | top level |

## Block pruning and the kernel stream

Consider a dense kernel of `N` weights, with `N` a multiple of 8. It is cut
into `N/BS` blocks, numbered from 0. After pruning, the kept blocks are
`b0 < b1 < …`. Their indexes are:

- `b0` for the first block;
- `b(k) - b(k-1)` for each later block.

Each index must lie between 0 and 15. The pruning tool has to respect that
limit. An index of 0 is allowed only as padding, as described below.

A kernel reaches the dense module as a stream of 64-bit words:

```
 word 0        Nb = number of kept blocks
 word 1        ignored by the hardware (free for the kernel length)
 repeat:
   index word  16 indexes, index n in bits [4n+3:4n]
   2*BS words  the weights of those 16 blocks: each word holds G = 8/BS blocks,
               block g of the word in bytes [g*BS .. g*BS+BS-1]
```

- The last group may be short.
- A partial last weight word is padded with zero weights, and its unused
  indexes are 0. The padding then reads a valid address and adds nothing.
- A kernel with `Nb = 0` is legal. It has no words after the header, and its
  output is the bias-free value 0, after shift and ReLU.
- When a pass uses `CORES` kernels, the kernels follow each other and kernel
  `c` goes to core column `c`.

## The pruned dense datapath

This module is the hardest part of the design.

### Structure

`fc_module` is a matrix of `LINES × CORES` cores.

- **A line is one image of the batch.** Line `l` has its own batch memory,
  which holds image `l`'s input vector for the current layer.
- **A column is one kernel.** All the cores of column `c` multiply by the same
  weight word, so the weight memory, index FIFO and address generator of a
  kernel are shared by all lines.

Each column has its own chain, from the kernel stream to the cores:

```
 kernel stream ─► fc_index_loader ─┬─► weight memory[c]  (64-bit words, one per cycle)
                                   └─► index_fifo[c]     (one group of G indexes per weight word)
 index_fifo[c] head ─► fc_addr_gen[c] ─► G block addresses ─► every line's batch_mem
```

### Loading (`fc_index_loader`)

The loader keeps the current index word in a register. With each weight word
that follows, a multiplexer selects the next group of `G` indexes, which are
the indexes of the blocks packed in that word.

- That group goes into the kernel's FIFO.
- The weight word goes into the kernel's weight memory.

The FIFO therefore holds exactly one entry per weight word. The FIFO and the
weight memory are read together, one entry per cycle.

### Address generation (`fc_addr_gen`)

A running register starts at the layer's input base address, counted in
blocks of `BS` activations. For a group of indexes `i0..i(G-1)`:

- address `g` is `run + i0 + … + ig`;
- `run` then moves to the last of these addresses.

So a group yields `G` addresses in one cycle. The generator is a row of `G`
small adders.

### Batch memory (`batch_mem`)

The batch memory is written in 64-bit words, by the DMA and by the output
packer, and read in blocks of `BS·8` bits. For 2048 words this gives:

| BS | read address bits |
|---|---|
| 8 | 11 |
| 4 | 12 |

Each core needs `G` reads per cycle, so a line needs `CORES·G` read ports. A
block RAM has two ports, so the memory is built from `ceil(CORES·G/2)`
identical copies that are always written together:

| BS | G (blocks per weight word) | dual-port copies per core |
|---|---|---|
| 8 | 1 | ½ (two cores share one) |
| 4 | 2 | 1 |
| 2 | 4 | 2 |
| 1 | 8 | 4 |

A smaller block size prunes more finely, which helps accuracy, but it costs
block RAM. Logic grows only slightly.

A read port returns the 64-bit word that contains the block. A registered
select then picks the `BS`-byte slice. For `BS < 8`, the `G` slices are
concatenated into the 64-bit operand of the core.

### A pass

1. `layer_init`, once per layer, points the output packers at `cfg.out_base`.
2. The `CORES` kernels of the pass are streamed in. Batch memory writes are
   also possible at this point.
3. `start` begins the pass:
   - Every column pops its FIFO once per cycle until the FIFO is empty.
   - The popped index group drives the address generator. The weight memory
     reads the matching word in the same cycle.
   - One cycle later, the activation blocks and the weight word meet in the
     cores of every line.
4. When all columns are empty and the pipeline has drained, the sums are read
   out one core per cycle, kernel 0 first, as follows:
   - `shift_relu` scales, rectifies and saturates each sum to a byte.
   - `fc_out_pack` collects 8 consecutive output bytes into a 64-bit word.
   - That word is written to the line's batch memory at
     `out_base, out_base+1, …`, where it becomes the input of the next dense
     layer, and it also appears on `out_*`.
5. `done` pulses. The count of loaded kernels resets.

Kernels of different lengths may share a pass. A pass whose longest kernel
has `N` weight words takes at most `N + CORES + 5` cycles, from `start` to
`done`. The testbenches check this bound. Kernel and batch loads are refused
(`ready` low) while a pass runs. The kernel stream is also held while an index
FIFO is full.

Throughput follows directly from this timing. At 90% pruning, the three dense
layers of AlexNet keep about 731 k of their 7.33 M weight words. They compute
in about 777 k cycles for the whole batch, whatever the block size or the
batch size. At 70% pruning, about 2.08 M words are kept, which takes about
2.12 M cycles.

A kernel is loaded only while the module is idle. The loader takes one word
per cycle, so a pass costs about its weight words twice: once to load them
and once to compute with them. Loading is not overlapped with computing.

### Block sizes

`BS` is a static parameter: 8, 4, 2 or 1. `BS = 1` is ordinary
weight-by-weight pruning, with each weight word carrying eight
independently placed weights. `CORES` must divide 8.

## The convolutional module

### Convolution as one dot product

Feature maps are stored position by position, with all the maps of one
`(x, y)` position held in consecutive 64-bit words (`zpw = ⌈z_p/8⌉` words).
An output neuron whose window starts at word `s` is:

```
sum over i < yk, j < xk*zpw:  W[i*xk*zpw + j] · A[s + i*xp*zpw + j]
```

So one address generator serves every kernel shape, stride and number of
maps. Weights are read in plain sequence. Kernels are stored in the same
order, padded to whole words.

### Parallelism (`conv_cluster`)

- There are `LINES × COLS` cores.
- All cores of a line read the same activation word from that line's feature
  map memory (FMM). The `COLS` cores of a line therefore compute `COLS` output
  maps at once.
- All cores of a column read that column's weight memory.
- The lines hold different bands of the input rows. They compute different
  output positions with the same kernels.

### Pooling merged into the loop (`conv_addr_gen`, `conv_srp`)

The loop order, outermost first, is:

1. output row;
2. output column;
3. pooling-window row;
4. pooling-window column;
5. kernel row;
6. word.

All the convolution outputs of one pooling window are produced one after
another. The Shift/ReLU/Pool unit of each line keeps a running maximum per
kernel and emits the result only at the window's end. Only pooled values leave
the module.

### Result chain and stalls

When a dot product ends, the `COLS` sums of a line are loaded into a shift
chain. The chain carries them, core 0 first, to the line's Shift/ReLU/Pool
unit, one per cycle. Each result is tagged with its kernel number
(`conv_out_kernel`).

The chain needs `COLS` cycles to empty. If the dot products are shorter than
that, as with 1×1 kernels over few maps, the address generator holds back the
next dot-product end and raises `stall`.

### Loading

The FMMs are loaded by DMA beats that carry a line number and a word address.
How a map is cut into per-line bands, and into parts when it does not fit, is
the host's choice. The weight memories are filled in sequence, `cfg.kwords`
words per column. The write pointer rewinds after each pass, so layers with
more than `COLS` kernels run as several passes.

## Controller and DMA switch

The controller has 32-bit registers on a simple write/read bus:

| reg | content |
|---|---|
| 0–2 | `conv_cfg_t` (lsb in reg 0): `xp`, `zpw`, `xk`, `yk`, `stride`, `pool`, `pstride`, `ox`, `oy`, `shift`, `relu`, `kwords` |
| 3–4 | `fc_cfg_t` (lsb in reg 3): `in_base`, `out_base`, `shift`, `relu` |
| 5 | route table: destination `d` in bits `[4d+2:4d]` = `{enable, source[1:0]}` |
| 6 | command pulses: bit 0 start conv pass, bit 1 FC layer init, bit 2 start FC pass |
| 7 | status: conv busy, FC busy, conv done, FC done, bits `[7:4]` kernels loaded into the FC module |

- The done bits are sticky until the next start.
- `irq` is high while a done bit is set.
- Switch destinations are: 0 conv FMMs, 1 conv weights, 2 FC batch
  memories, 3 FC kernels.
- A source may feed at most one destination. An assertion in the controller
  checks this.
- A source's `ready` is the ready of the destination it feeds.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `CONV_LINES`, `CONV_COLS` | 7, 16 | convolution core matrix |
| `FMM_WORDS`, `CW_WORDS` | 2048, 512 | 64-bit words per FMM and per conv weight memory |
| `FC_LINES` | 2 | batch size |
| `FC_CORES` | 1 | kernels computed in parallel |
| `BS` | 8 | pruning block size (8, 4, 2, 1) |
| `BM_WORDS`, `FW_WORDS` | 2048, 2048 | 64-bit words per batch memory and per FC weight memory; index FIFOs are as deep as the weight memory |
| `NDMA` | 4 | DMA read channels |

The larger configurations differ only in these parameters:

- the 70% pruning variant: batch 3, so `FC_LINES = 3`;
- the Zynq-7045 variant: 64 × 7 convolution cores and batch 16, so
  `CONV_COLS = 64` and `FC_LINES = 16`.

At the defaults, the dense layers of AlexNet fit as follows, with 90% pruning
and `BS = 8`:

- FC6 needs 9216 inputs + 4096 outputs = 1664 of the 2048 batch-memory
  words.
- One FC6 kernel is about 116 of the 2048 weight words. Even unpruned, it is
  1152.

The convolution kernels of AlexNet need at most 288 of the 512 weight words.
With the output rows dealt out to the 7 lines, the input bands of CONV2 to
CONV5 fit the 2048-word FMMs whole. The largest is CONV3, at 4 rows × 15 × 32
words = 1920. CONV1 does not fit whole. Even a single output row per line
needs 11 input rows × 227 words = 2497 words. CONV1 must therefore be cut into
column parts as well as row bands.

## Departures and own choices

These points differ from the design as published, or fill gaps it leaves
open.

- **Conv outputs leave as streams.** The convolution results leave on
  `conv_out_*` and are meant to be written back to external memory by a DMA
  write channel. They are not stored back into the FMMs. Reloading them for
  the next layer is the host's job. The DMA engines themselves are not
  included.
- **Dense outputs are written back.** The dense outputs are written back into
  the batch memories, and also appear on `fc_out_*`.
- **Kernel header.** The second header word of a kernel is not used. The
  first holds the number of kept blocks.
- **Unbuilt widths and encodings.** The following were not given and are this
  design's own:
  - memory depths other than the 2048-word batch memory;
  - configuration field widths;
  - the register map;
  - the DMA beat format;
  - the route-table encoding.
- **Fixed-point rules.** Rounding in `shift_relu` is round-half-up, and the
  result saturates. No rule was given. Biases are not modelled.
- **Pooling.** Max pooling only. Local response normalisation, which AlexNet
  uses, is not included.
- **Stall rule.** The conv stall rule keeps dot-product ends at least `COLS`
  cycles apart. It is this design's way of sharing one Shift/ReLU/Pool unit
  per line.
- **No load/compute overlap.** The dense module does not load the next
  kernels while it computes. The document does not say how the two are
  scheduled. Double-buffering the weight memory and the FIFOs would hide the
  load time.
- **No dispatcher.** No data dispatcher is built to share DMA bandwidth
  between the two modules. The switch assigns whole channels.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench:

- compares the module's outputs with values it computes itself;
- has a watchdog;
- ends by printing `TB_RESULT checks=<n> failures=<n>`.

The testbenches that go beyond a single module are:

| testbench | what it covers |
|---|---|
| `tb_fc_module`, `tb_fc_blocksizes` | two chained dense layers (256 → 64 → 8) with random block pruning, for BS = 8, 4, 2, 1, one or two cores, batch 2 or 3, including empty and unbalanced kernels and the pass-time bound |
| `tb_cnn_accel_top` | the whole accelerator at default sizes, driven through the register bus and the DMA channels (details below) |
| `tb_alexnet_conv` | AlexNet convolution layers on `conv_module` at default size: CONV3 whole (384 kernels in 24 passes), CONV5 with its 3×3 / stride 2 max pooling merged (64 kernels), and one column part of CONV1 (11×11, stride 4); checks every output and one word pair per cycle |
| `tb_alexnet_fc` | the three AlexNet dense layers (9216 → 4096 → 4096 → 1000) on `fc_module` with 2048-word memories, in five configurations: BS 8, 4 and 1 at 90% pruning with batch 2, BS 8 at 70% pruning with batch 3, and BS 8 at 90% with batch 16; checks every output word and the cycle bound of every pass |

`tb_cnn_accel_top` runs a network and counts that each mechanism happened:

- the network is a 3×3 conv layer with merged 2×2 pooling, then a 1×1 pass
  that stalls, then two dense layers;
- the mechanisms counted are stalls, pooling, skipped blocks, empty kernels,
  refused loads, write-back reuse, a switch re-route and the interrupt.

## Simulating

Any Verilator 5 works:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_cnn_accel_top rtl/cnn_pkg.sv tb/tb_cnn_accel_top.sv
./obj_dir/Vtb_cnn_accel_top
```

Replace the top module and file for any other testbench. For example,
`tb_cnn_accel_top` builds in about 20 s and runs in well under a second.
`tb_alexnet_fc` and `tb_alexnet_conv` each take 10 to 30 s.

The package must come first on the command line. The other modules are found
through `-y`.

To try another configuration, change the parameters of `cnn_accel_top` or
`fc_module`. `tb_fc_blocksizes` shows how.
