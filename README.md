# Epoch-wide in-situ neighbourhood sampler for GNN training

GraphSAGE-style GNN training builds every mini-batch by sampling a fixed
number of neighbours (the *fanout*) of each target node, layer by layer.
When the graph lives on disk, a CPU-side sampler has to pull whole
neighbourhoods into memory only to keep a few percent of them. This RTL
moves that step next to the storage: an FPGA that shares a PCIe switch with
an SSD (a SmartSSD-class device) reads the edge file chunk by chunk into its
own DRAM and samples there, so only the samples travel to the host.

Two properties make this work. Samples of different mini-batches do not
depend on each other, and the first layer's targets (the training nodes) are
known in advance. So one layer of a whole epoch can be sampled in a single
pass over the edge file. That pass is one kernel call per layer, with no
host round trip per mini-batch or per chunk. The hardware here is the sampling kernel
that does that pass: `sampling_kernel` and what it instantiates.

## Chunk format

The edge file is preprocessed into fixed-size, sorted, indexed chunks of
32-bit words. Each chunk holds a run of consecutive node IDs:

| word            | contents                                                     |
|-----------------|--------------------------------------------------------------|
| 0               | `src`: ID of the first node in the chunk                     |
| 1               | `cnt`: number of nodes in the chunk                          |
| 2 .. 2+cnt      | `offsets[0..cnt]`: word position (from the chunk start) where each node's neighbour list begins; `offsets[cnt]` ends the last list |
| offsets[0] ..   | neighbour lists, back to back                                |
| end             | zero padding up to the chunk size / alignment                |

Node `src+i` owns the neighbour words at positions `[offsets[i], offsets[i+1])`.
A worked example, used in the testbenches, is the 16-word chunk:

    0 3 | 6 11 13 15 | 1 2 4 8 9 | 3 4 | 5 6 | 0
    src cnt  offsets    node 0     n. 1  n. 2  pad

With targets {0, 2} and fanout 2, node 0 draws two of {1, 2, 4, 8, 9} and
node 2 gets {5, 6}. A possible result is `1 8 5 6`.

The original design uses 512 MB chunks. The chunk size is not a parameter of
the logic: offsets are 32-bit word positions, which covers chunks of up to
16 GiB.

## One kernel call: one layer of an epoch

The host gathers the targets of the current layer for the whole epoch, sorts
and deduplicates them, and loads into the FPGA's DRAM only the chunks that
hold them. It then starts one call, which samples the whole layer. If the
chunks do not all fit in DRAM at once, the layer takes a few calls, each
over a group of chunks. All
areas are given as word addresses:

* `chunk_base`, `chunk_words` and `n_chunks` describe the loaded chunks
  (the *input buffer*). They lie back to back at a fixed stride, chunk `c`
  at `chunk_base + c*chunk_words`, in ascending node-ID order.
* `tgt_base` and `tgt_count` give the sorted target node IDs (the *target
  array*).
* `res_base` is the *result buffer*. Target `i` owns the words
  `res_base + i*fanout + k`, with `k < fanout`.

The host pulses `start` with the arguments and waits for `done`. It copies
the results back and deduplicates the sampled nodes, which become the next
layer's targets. For every target the kernel writes exactly `fanout` words:

* **degree < fanout**: every neighbour in list order, then `DUMMY_NODE`
  (`0xFFFFFFFF`) in the remaining slots;
* **degree ≥ fanout**: a uniform random sample of `fanout` distinct
  neighbours, in list order;
* **target in no loaded chunk**: `fanout` dummies. Such a target lies in a
  gap between chunks, below the first chunk or beyond the last. The host is
  expected to load every chunk it needs; this case is defined only so that
  a bad target cannot read outside a header.

`fanout` is a run-time argument of up to `MAX_FANOUT` (25). Larger values are
clamped to 25.

## How the kernel is organised

```
               +-------------------+  rd port 0 (header, targets)
  start ------>| kernel_controller |<----------------------------> DRAM
  done  <------|                   |
               +---------+---------+
                   job   |  lane_start / lane_busy
        +----------------+----------------+
        v                v                v
  +-------------+  +-------------+  +-------------+   rd ports 1..32
  | sample_lane |  | sample_lane |  | sample_lane |<--------------> DRAM
  |  + lane_rng |  |  + lane_rng |  |  + lane_rng |
  +------+------+  +------+------+  +------+------+
         +-------------+  |  +-------------+
                       v  v  v
                 +----------------+   wr port
                 | result_arbiter |-------------> DRAM (result buffer)
                 +----------------+
```

* **kernel_controller** walks the chunks and the sorted targets together,
  like a merge. It reads a chunk's header words `src` and `cnt`, then reads
  targets one at a time. A target inside the current chunk goes to the
  lowest-numbered idle lane, together with the chunk's address and header.
  A target beyond the current chunk first makes the controller read the
  next chunk's header. The lanes carry their own copy of the header, so
  they can still be sampling the previous chunk while the controller moves
  on. A target that finds every lane busy waits in a one-entry job
  register. `done` pulses once all targets have been handed out and every
  lane is idle. A lane stays busy until its last result word has been
  accepted, so no write is still in flight at `done`.
* **sample_lane** (32 of them; the original design unrolls its sampling
  loop 32 times) takes one target at a time. It reads the two boundaries
  `offsets[t-src]` and `offsets[t-src+1]`, then copies or samples as
  described below.
* **lane_rng** is a 32-bit xorshift generator (shifts 13, 17, 5), one per
  lane. It is reseeded at every call with `seed ^ (0x9E3779B9 * (lane+1))`.
* **result_arbiter** merges the lanes' writes onto one write port,
  round-robin. While the memory stalls a write, the arbiter keeps the same
  grant, so address and data stay stable.

### Drawing the sample inside a lane

The original description asks only for "a uniform sample" of the
neighbourhood. The example above shows distinct samples, so this design
samples **without replacement**. It uses *selection sampling*: the lane
walks the neighbour list once and keeps position `j` with probability
`needed / remaining`, where `needed` is the number of slots still to fill
and `remaining` the number of neighbours not yet examined. In hardware the
test is

    keep = ((rnd * remaining) >> 32) < needed        // 32x32 multiply

with a fresh 32-bit random word `rnd` for each neighbour examined. When
`remaining == needed` the test always passes, so the sample always fills
exactly. Every subset of size `fanout` is equally likely. The method needs
no record of earlier picks and returns the sample in list order. It also
reads only the neighbours it keeps, not the whole list. With degree equal
to fanout it keeps every neighbour, which matches the copy rule.

Cost per target, in cycles when the memory answers at once: two boundary
reads, then one decision cycle per neighbour examined, plus a read, a write
and a bookkeeping cycle per result word. With 32 lanes, 320 targets of
degree 92 at fanout 10 finish in about 4,400 cycles. This run uses a DRAM
model with 3-cycle latency and 25 % random stalls. One lane alone would need
more than 30,000 cycles just for the decisions.

## Memory ports and timing

All memory traffic uses 32-bit words and `ADDR_W`-bit word addresses.

* **Read ports** (`rd_*[0]` for the controller, `rd_*[1+i]` for lane `i`):
  `rd_valid` with `rd_addr` is held until `rd_ready`. The response comes
  back later on `rd_rvalid`/`rd_rdata`, in order and with any latency.
  Each port has at most one read in flight, so a port needs no response
  buffer deeper than one.
* **Write port**: `wr_valid`, `wr_addr` and `wr_data` are held until
  `wr_ready`, one word per accepted cycle.
* **Call**: `start` is taken while `busy` is low. The arguments are
  registered then and may change afterwards. `busy` rises on the next
  clock edge and falls in the cycle where the one-cycle `done` pulse comes.
  `lane_busy` shows which lanes are working.
* Reset is asynchronous and active low.

Concurrent assertions check the hold rules on the lane and arbiter ports.
They also check that the controller starts only idle lanes, one at a time,
and that selection sampling never runs out of neighbours.

## Parameters

| parameter    | default | meaning                                            |
|--------------|---------|----------------------------------------------------|
| `LANES`      | 32      | parallel sampling lanes (the unrolling factor)     |
| `MAX_FANOUT` | 25      | largest fanout of a call; covers {25,10} and {20,15,10} |
| `ADDR_W`     | 32      | word-address width into FPGA DRAM (16 GiB)         |

Word width (32), `DUMMY_NODE` and the header positions are in
`sampler_pkg`.

## Fit to the evaluated graphs

The original work evaluates 2-layer {25, 10} and 3-layer {20, 15, 10}
GraphSAGE sampling on Papers100M (111 M vertices, 1.6 G edges, 1.2 M
training nodes) and Yahoo (1.4 G vertices, 6.6 G edges, 1.4 M training
nodes). Both fit the default configuration:

* every fanout is at most 25;
* 1.4 G node IDs fit in 32 bits without reaching the dummy value;
* a 512 MB chunk (2^27 words) keeps all offsets inside 32 bits;
* first-layer results of 1.4 M × 25 words (140 MB) are small next to the
  4 GB of DRAM that such a device carries.

The preprocessed edge files (6.5 GB and 30 GB) are larger than that DRAM,
so the host splits each layer into several calls. Each call covers the
chunks that fit in DRAM at once (about six 512 MB chunks) and the targets
that fall in them. The kernel places no limit on `n_chunks` or `tgt_count`,
so this split is the host's choice.

## What follows the original design and what is added here

Taken from the original description:

* the chunk format;
* the copy-and-pad rule for degree < fanout and a uniform sample otherwise;
* dummy fill;
* the three DRAM areas;
* one call per layer of an epoch, iterating chunk by chunk over the
  sorted targets;
* 32-fold parallelism;
* the fanouts.

Choices of this design, not given there:

* sampling without replacement by selection sampling;
* the xorshift generator and its per-lane seeding;
* the dummy value `0xFFFFFFFF`;
* the result layout (`fanout` words per target, in target order);
* the back-to-back placement of the loaded chunks;
* the merge walk over chunks and targets;
* dummies for targets in no loaded chunk;
* clamping of too-large fanouts;
* dynamic hand-out of targets to free lanes, rather than fixed groups of 32;
* the valid/ready memory ports, with one read in flight per port;
* the round-robin result arbiter;
* the `lane_busy` status output;
* the 32-bit address width.

Not part of this RTL are the SSD and its NAND, the PCIe switch and its
peer-to-peer DMA, the host DMA engine and the FPGA's DRAM controller. The
host software that preprocesses chunks, sorts and deduplicates targets and
rebuilds mini-batches is also left out. The kernel meets the DRAM only
through its ports. The memory-side throughput of a real DRAM controller
behind 33 read ports is therefore not modelled. A real implementation
would put caches or per-lane buffers there.

## Files

| file                        | contents                                        |
|-----------------------------|-------------------------------------------------|
| `rtl/sampler_pkg.sv`        | word type, dummy value, header positions, job struct |
| `rtl/sampling_kernel.sv`    | top: argument registers, controller, lanes, arbiter |
| `rtl/kernel_controller.sv`  | merge walk over chunks and targets, lane hand-out, done |
| `rtl/sample_lane.sv`        | boundary lookup, copy/pad, selection sampling   |
| `rtl/lane_rng.sv`           | xorshift32 generator                            |
| `rtl/result_arbiter.sv`     | round-robin write merge                         |
| `tb/dram_model.sv`          | behavioural DRAM: sparse storage, latency, random stalls |
| `tb/tb_*.sv`                | one self-checking testbench per module          |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a cycle watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/sampler_pkg.sv tb/tb_sampling_kernel.sv --top-module tb_sampling_kernel
    ./obj_dir/Vtb_sampling_kernel

Replace the top module name to run another testbench: `tb_sample_lane`,
`tb_kernel_controller`, `tb_result_arbiter` or `tb_lane_rng`.

`tb_sampling_kernel` runs the kernel at its default parameters. It builds a
600-node random graph, packed into 1024-word chunks, and acts as the host.
It runs a 2-layer {25, 10} epoch and a 3-layer {20, 15, 10} epoch. Each
layer is one call over all the chunks it needs, and the samples are
deduplicated between layers. It also runs:

* the worked example;
* a call with targets in a chunk that was not loaded;
* a clamped fanout;
* 320 samples of one node, with a chi-square test of uniformity and a
  check that the lanes work in parallel.

Every result row is checked against the graph. The testbench counts how
often each of these happens and fails if any never occurs:

* copy-and-pad, sampling, and degree equal to fanout;
* targets in no loaded chunk;
* chunk switches inside a call;
* read and write stalls;
* two lanes competing for the write port;
* all lanes busy.

The whole run takes a few seconds. `tb_sample_lane` compares every result
word exactly with a reference model of the copy/pad rule and of selection
sampling.
