# SNAP: a sparse DNN accelerator in SystemVerilog

SNAP runs convolution and fully connected layers whose weights (W) and
input activations (IA) are both sparse and stored compressed. Only nonzero
values are kept, each tagged with its input-channel index (c-idx). Two
problems follow.

- **Front end.** Feeding the multipliers needs the W/IA pairs whose channel
  indices match. SNAP finds them with an associative search.
- **Back end.** The products of sparse pairs land on scattered outputs,
  which causes write contention at the output buffer. SNAP reduces psums
  first inside each processing element (PE), along the channel dimension,
  and then across PEs of a core, along the pixel dimension. Far fewer psums
  then reach the buffer.

This repository holds synthesizable RTL for the compute side of the chip:

- 4 cores of 7 × 3 PEs;
- 3 16-bit multipliers per PE, 252 in all;
- one shared AIM (associative index matching unit) per PE row;
- the core-level reducer, configurable for general R × S convolution or for
  pointwise convolution and FC layers;
- a global accumulator;
- a multi-banked IA/OA buffer;
- the output compression unit.

The off-chip interface, the W buffers and the dispatcher that moves bundles
into the cores are not included. The cores' register-file load buses are
top-level ports instead.

## Channel-first bundles

Work is handed to PEs as *bundles*.

**IA bundle.** The nonzero activations of one input pixel (h, w) across its
channels: data plus c-idx, at most 32 entries.

**W bundle.** The nonzero weights of one kernel column s, ordered
channel-first:

- entries are grouped into *segments*, one per (kernel row r, output
  channel k);
- inside a segment, entries are sorted by channel;
- three small arrays describe the segments:
  - `pos-ptr`: the first entry of each segment;
  - `r-idx`: the segment's r;
  - `k-idx`: the segment's k.

The W register file holds 64 entries and 16 segments (`snap_w_rf`). The IA
register file holds 32 entries plus the pixel's h and w (`snap_ia_rf`).

A product W(r, s, c, k) · IA(h, w, c) belongs to output
(x, y, k) = (h − r, w − s, k). Because a segment fixes r and k, every
product of one segment goes to the same output. Consecutive products can
therefore be summed before anything leaves the PE. This is the whole point
of the channel-first order. Stride is 1: the address path computes exactly
x = h − r and y = w − s.

## Finding pairs: AIM and the sequence decoder

`snap_aim` compares a chunk of 32 W channel indices against the 32 IA
channel indices in a 32 × 32 array of equality comparators.

- Each row ends in a priority encoder. It reports whether W entry i has a
  matching IA, and at which IA position.
- Invalid entries never match (a short bundle is padded with invalid slots).
- One AIM serves the three PEs of a row. A round-robin arbiter grants one
  request per cycle, and the list is returned one cycle later.

`snap_seq_decoder` receives that valid-position list.

- It stores the list in a Valid RF and a Pos RF.
- Each cycle, a three-way priority encoder takes the first three valid
  entries.
- For each one it emits:
  - the W address: the list index plus the chunk's base in the W RF;
  - the IA address: the stored position.
- It then clears those valid bits.
- A second list slot lets the PE request the next chunk's list while the
  current one is still being consumed. This is the prefetch. It keeps the
  multipliers busy across chunk boundaries.

A W bundle longer than 32 entries is walked in two chunks.

## The PE pipeline and Table I reduction

`snap_pe` has two stages. The stall logic is the part of the design that
takes the most care.

1. **Stage 1.** Registers the three pairs' operands, read from the RFs,
   together with the r and k of each W entry's segment.
2. **Stage 2.** Multiplies, then lets `snap_addr_path` compute each
   product's OA address `(k·OH + x)·OW + y`, its in-range flag and its
   order key `{k, r}`.

The reduction controller picks one of the four patterns from the keys of
neighbouring lanes. Because of the channel-first order, equal keys mean
equal addresses.

| pattern | condition   | psums produced |
|---------|-------------|----------------|
| A+B+C   | A = B = C   | 1              |
| A+B, C  | A = B ≠ C   | 2              |
| A, B+C  | A ≠ B = C   | 2              |
| A, B, C | all differ  | 3              |

`snap_compute_path` forms the sums.

The most recently produced psum is not written at once. It stays open in a
register. If the next cycle's first output has the same key, the two are
merged. Otherwise the open psum is closed and pushed into the OA psum RF
(`snap_oa_psum_rf`, an 8-deep FIFO taking up to three writes and one read
per cycle).

A psum therefore leaves the PE only when no further channel of its segment
can arrive. When the FIFO cannot accept three more psums, both stages
freeze together. That is the PE-level stall.

`mac_count` counts the multipliers used each cycle.

## Core-level reduction: diagonal and row modes

`snap_core_reducer` groups the 21 PEs of a core into lanes.

**Diagonal mode** is for R × S convolution with R, S > 1.

- PE(i, j) holds IA pixel column w0 + i and kernel column s = j.
- It therefore produces outputs in column w0 + i − j.
- Its lane is i − j + 2, giving 9 lanes.
- All PEs of one lane produce psums for the same outputs. The lane adds
  them.

**Row mode** is for pointwise convolution and FC layers, which have no
pixel-dimension reduction. Each PE row is one lane.

**Alignment.** Every PE of a lane walks the same (r, k) segments in the same
order, but some PEs may produce nothing for a segment. A lane therefore
waits until each member either has a psum at its FIFO head or has finished
its pass. It then sums all heads that carry the smallest key and pops them.
The wait is what slows the faster PEs of a lane down.

**Core output.** A round-robin arbiter in `snap_core` forwards one lane sum
per cycle to the global accumulator. `snap_cfg_ctrl` decodes the row and
column masks of the load bus into per-PE write enables. It also holds the
layer configuration (mode, OH, OW).

## System: global accumulator, buffer and compression

`snap_global_acc` takes one psum per cycle from the four cores, round robin.
It adds the psum into the OA buffer word at its address: read, add and
write in one cycle. This merges:

- psums of the same output coming from different cores or passes;
- the partial sums of the edge lanes of diagonal mode.

Psums whose (x, y) fall outside the output map are dropped.

`snap_ia_oa_buffer` has 16 word-interleaved banks (bank = address mod 16)
and 8192 32-bit words in total. It has two ports:

- **Accumulation port:** reads combinationally and writes at the clock edge.
- **Host port:** reads with one cycle of latency. The host's write is
  refused (`h_gnt` low) when it hits the bank the accumulator writes in the
  same cycle.

`snap_compress` walks the output map pixel by pixel. For each kernel k it:

1. reads the word;
2. applies an optional ReLU;
3. shifts right arithmetically by `shift`;
4. saturates the result to 16 bits.

Nonzero results leave as (value, k) pairs, which is the next layer's
compressed IA bundle format. `c_last` marks a pixel's last word, and a pixel
with no nonzero value is sent as one word with `c_empty` set.

## Using the top level (`snap_top`)

A layer pass goes like this:

1. Write the configuration: `cfg_we`, with `cfg_in` = {mode, OH, OW}.
2. Load bundles over each core's `ld_word` bus, one word per cycle:

   | kind        | contents |
   |-------------|----------|
   | `LD_W`      | W entry: addr, data, c-idx |
   | `LD_WSEG`   | segment: pos-ptr, r, k |
   | `LD_WMETA`  | W bundle: length, segment count, s |
   | `LD_IA`     | IA entry: addr, data, c-idx |
   | `LD_IAMETA` | IA bundle: length, h, w |

   `ld_rowmask` and `ld_colmask` select the PEs a word is written to. One IA
   bundle is typically broadcast to a row and one W bundle to a column.
3. Pulse `start`. `done` rises when every PE has finished and every psum is
   in the buffer.
4. Repeat passes as needed. They accumulate in the buffer.
5. Clear the buffer or read it back through the `h_*` port.
6. Pulse `comp_start` to stream the compressed output on `c_*` (valid/ready).
   The compression unit owns the host port while `comp_busy` is high.

## Where this RTL departs from the published chip

**From the published design:**

- 4 cores × 7 × 3 PEs × 3 multipliers, 16-bit data;
- the 32 × 32 AIM shared by a PE row;
- a three-way sequence decoder with prefetch;
- the Table I patterns;
- the OA psum RF;
- diagonal and row reduction modes;
- a global accumulator;
- 16 IA/OA banks;
- compression of the output.

**Choices of this design:**

- all index and address widths (c-idx 12 bits, k 12, r and s 4, pixel
  coordinates 8, psums 32);
- W RF of 64 entries and 16 segments;
- IA RF of 32;
- psum RF depth 8;
- one-cycle AIM latency and round-robin arbitration everywhere;
- the two-stage PE pipeline;
- the lane alignment rule;
- the accumulation rate: one psum per cycle for all four cores together.
  The chip's writeback traffic is about 2.8 psums per cycle per core on
  average. This RTL therefore becomes accumulator-bound whenever the
  channel reduction inside the PEs is weak;
- the buffer size: 8192 words rather than the chip's full SRAM, and
  registers rather than SRAM macros;
- the load-bus word format;
- the activation and requantisation in compression.

**Not built:**

- the per-core W buffers;
- the data-alignment unit;
- the dispatcher, dataflow controller and core controller;
- the external interface;
- the on-chip clock oscillator.

Their behaviour is only named, not specified. An external agent must
therefore schedule bundles and passes. Strides other than 1 are not
supported.

**Layer sizes.** Large layers must be tiled by the host, because the buffer
holds 8192 output words:

- a 56 × 56 ResNet-50 layer runs one kernel per pass;
- FC layers wider than 4096 inputs run in channel groups, which the
  accumulator sums.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Itb \
        rtl/snap_pkg.sv $(ls rtl/*.sv | grep -v snap_pkg) \
        tb/tb_snap_core.sv --top-module tb_snap_core
    ./obj_dir/Vtb_snap_core

The package must come first and appear only once. `-Wno-fatal` keeps
Verilator's width and unused-signal warnings from stopping the build.

**`tb_snap_top`** runs the whole accelerator at its default size (4 cores,
no parameter overrides). It takes about two minutes, mostly compile time. It
runs three layers:

1. a 3 × 3 convolution in diagonal mode, over four passes;
2. a pointwise convolution in row mode;
3. an FC layer.

It checks every output word against a reference computed in the testbench,
and the compressed stream of layer 1 as well. It also counts how often each
mechanism occurred and fails if any never did:

- AIM prefetch;
- PE-level merges;
- out-of-range drops;
- lane waits and stalls;
- all four Table I patterns;
- both modes;
- empty pixels.

**`tb_snap_workload_synth`** runs one 3 × 3 convolution (8 × 9 pixels,
8 channels, 2 kernels) at the three IA/W densities used to evaluate the
chip: 1.0/1.0, 0.4/0.4 and 0.1/0.1. For each density it checks:

- every output word;
- that the number of multiplications performed equals the number of
  effectual W/IA pairs counted from the data.

It prints cycles and utilisation. With only 8 channels there is little to
reduce inside a PE, so psums leave the cores almost as fast as they are
made. The run is then limited by the global accumulator, which takes one
psum per cycle, and utilisation is low (a few percent). These numbers
describe this small layer and say nothing about deep-channel layers.

**Unit testbenches** drive their blocks with random stimulus and check them
against models written independently in the testbench. Examples:

- the AIM against the pairs of a nested loop;
- the reducer against a per-lane sum of keyed psums;
- the buffer against a flat array model.
