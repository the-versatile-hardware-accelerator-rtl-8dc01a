# Sparse vector similarity accelerator

This design compares a small group of sparse *reference* vectors against a
long stream of sparse *database* vectors. Each reference vector sits in its
own processing channel. The database stream is copied to every channel, and
each channel returns one result per database vector. The intended use is
text search: documents are TF-IDF vectors, and the result is their cosine
similarity. Speed comes from running many identical channels in parallel,
each fed through plain FIFO interfaces. Only the *process block* inside a
channel knows what is computed, so another two-stream operation could replace
it without touching the rest.

The architecture follows the article "The versatile hardware accelerator
framework for sparse vector calculations" (M. Karwatowski, K. Wiatr, AGH
Kraków). The article describes the blocks and how they connect, but gives
few sizes, formats or timings. Everything it leaves open was chosen here; the
section *What is fixed by the architecture and what was chosen* lists those
choices.

## Sparse vectors on a stream

A sparse vector is sent as its nonzero elements only, each one an
(ID, value) pair. Every stream word is a `word_t` (see `rtl/sva_pkg.sv`):

| bits    | field  | meaning                                  |
|---------|--------|------------------------------------------|
| 40      | `last` | this is the final pair of the vector     |
| 39..16  | `id`   | feature ID, 24 bits                      |
| 15..0   | `val`  | coefficient, unsigned 16-bit fixed point |

A vector on a stream looks like this:

```
[header 0] ... [header H-1] [pair 0] [pair 1] ... [pair n-1, last=1]
```

* Headers are words of any content, for example a document number. Their
  count is fixed per stream and set in a register: 0 to 4 reference header
  words and 0 to 4 database header words. Header words never have `last` set.
* Pair IDs must **ascend strictly** within a vector, and a vector has at
  least one pair. (If a vector has no nonzero elements, send one pair with
  value 0.)

For each (reference, database) pair of vectors, a channel writes
`Hr + Hd + 1` words of 48 bits (`res_t`) to its processed stream: the header
words, zero-extended, in the chosen order, and then the sum of
`ref.val * db.val` over the IDs present in both vectors. For unit-length
vectors this sum is the cosine similarity. Software must scale the vectors,
because the hardware does no division or square root.

## Structure

```
                 +-------------------------------------------------------------+
 database  ----> | DB master FIFO --> cascaded splitter (CLONE_DATA) --+--+--+  |
 stream          |                                                    |  |  |  |
 reference ----> | REF master FIFO -> cascaded splitter (SPLIT_VEC) --+--+--+  |
 stream          |                                                    v  v  v  |
                 |                      processing channel 0 .. N_CH-1          | --> processed
                 +-------------------------------------------------------------+     streams (one
 register bus <--> command and status registers --(enable, reload, headers)--^       per channel)
```

| module               | role                                                        |
|----------------------|-------------------------------------------------------------|
| `sparse_vec_accel`   | top: processing system and registers                        |
| `processing_system`  | master FIFOs, two cascaded splitters, `N_CH` channels       |
| `cascaded_splitter`  | one splitter, or a two-level tree of them                   |
| `stream_splitter`    | one FIFO to up to 8 FIFOs, clone or split mode              |
| `processing_channel` | slave FIFOs, reference memory, process block, result FIFO   |
| `ref_vector_memory`  | holds one reference vector and replays it endlessly         |
| `process_block`      | sorted merge, multiply-accumulate, header/result output     |
| `cmd_status_regs`    | register map, channel selection, reload pulses              |
| `sync_fifo`          | first-word fall-through FIFO used everywhere                |
| `sva_pkg`            | word types, widths and default sizes                        |

Everything runs on one clock. `rst` is synchronous and active high.

### FIFO interfaces

Every connection between blocks uses a native FIFO port. The writer drives
`wr_en` and `din` and must respect `full`. The reader sees the head word on
`dout` whenever `empty` is low and pops it with `rd_en` (first-word
fall-through). The reference memory uses the same ports, so the process block
cannot tell it from a FIFO.

### Splitters

`stream_splitter` reads one FIFO and writes to up to eight FIFOs:

* **CLONE_DATA** (database stream): each word is written to all enabled
  outputs in the same cycle. It moves only when none of them is full.
  A channel whose database FIFO is full therefore stalls the whole
  database stream. The FIFOs absorb short-term differences in channel speed.
* **SPLIT_VEC** (reference stream): whole vectors go to one output. After
  the word with `last` set, the splitter moves to the next enabled output,
  wrapping round. `restart` returns it to the lowest enabled output.

The full-to-read path is combinational, so the output count of one splitter
is limited (eight here). `cascaded_splitter` builds a tree for more channels.
A level-1 splitter feeds one small link FIFO per group of `SPLIT_WIDTH`
channels, and each link FIFO feeds a level-0 splitter. In split mode the
level-1 splitter sends a group as many consecutive vectors as the group has
enabled channels (its *quota*). After a restart, reference vector *k*
therefore lands on the *k*-th enabled channel, counted from channel 0.
Without the quota, a group with one enabled channel would receive two
vectors while another group went short. When `N_CH <= SPLIT_WIDTH`, as in
the default 8/8, a single splitter is used and the tree costs nothing. Two
levels support up to `SPLIT_WIDTH²` = 64 channels.

### Processing channel and the reference memory

The channel has a database FIFO (512 words) and a much smaller reference
FIFO (32 words). The reference FIFO only carries one vector into the
`ref_vector_memory` (2048 words). The memory:

* after `reload`, accepts words until it has taken one with `last` set, then
  shows `full`. Words beyond its depth are dropped and `overflow` is set. The
  final word still goes into the last location, so the stored vector is
  still terminated.
* by default has a block-RAM style registered read (`MEM_BRAM=1`); with
  `MEM_BRAM=0` the array is read combinationally. In both styles it goes
  non-empty two cycles after the last word is written. Reading past the last stored word wraps to the
  first, so the reader sees the vector repeated forever.

While a vector is being processed, the next reference vector can already wait
in the reference FIFO. The memory does not take it until `reload` is pulsed.

### Process block: the merge

Both input streams are sorted by ID, so the dot product is a merge of two
sorted lists, with one comparison per clock cycle:

```
HDR    read Hr reference and Hd database header words (in parallel) and keep them
MERGE  compare head IDs: equal   -> multiply values, consume both
                         ref<db  -> consume reference word
                         ref>db  -> consume database word
       until one side consumes its last word
DRAIN  read and discard the rest of the other vector up to its last word
FLUSH  one cycle for the product register / accumulator pipeline
OUT    write the headers (order by hdr_order) and the sum, one word per cycle
```

A pair starts only when both streams hold data. Until then nothing is read,
and `busy` is low. Draining keeps both streams aligned on vector boundaries.
For the reference, draining reads to the end of the stored vector, so the
memory's wrap-round brings the next pass back to its first header word.

Cost per pair with no stalls, in cycles:

```
max(Hr, Hd, 1) + merge steps + drained words + 1 + (Hr + Hd + 1)
```

The merge needs at most `len_ref + len_db - 1` steps. A 1,500 × 1,500 pair
takes at most about 3,000 cycles plus the drain, which is about 12 µs at
250 MHz. Throughput grows with the number of channels, since all enabled
channels work on the same database vector at once.

### Command and status registers

The registers are 32 bits wide. A write takes effect at the clock edge. Read
data appears on `reg_rdata` one cycle after `reg_rd_en`. Per-channel bit sets
span `NW = ceil(N_CH/32)` words at `base + k`. Channel `c` is bit `c % 32` of
word `c / 32`.

| addr      | name     | access | contents                                                      |
|-----------|----------|--------|---------------------------------------------------------------|
| 0x00      | CTRL     | rw     | b0 soft reset of the processing system (held while 1); b1 restart reference splitter (pulse, reads 0); b2 header order (0 = reference headers first) |
| 0x01      | HDR      | rw     | [2:0] reference header words, [10:8] database header words (clamped to 4) |
| 0x02      | CH_COUNT | rw     | number of channels in use, from channel 0 (reset: `N_CH`)     |
| 0x03      | INFO     | ro     | [15:0] `N_CH`, [23:16] maximum header length                  |
| 0x04      | STATUS   | ro     | b0/b1 database/reference master FIFO empty, b2/b3 full        |
| 0x10+k    | CH_MASK  | rw     | channel enable mask (reset: all ones)                         |
| 0x20+k    | RELOAD   | wo     | 1 bits pulse `reload` to those channels' memories             |
| 0x30+k    | LOADED   | ro     | reference vector stored                                       |
| 0x40+k    | RESULTS  | ro     | processed FIFO not empty                                      |
| 0x50+k    | BUSY     | ro     | process block part-way through a pair                         |
| 0x60+k    | OVERFLOW | ro     | reference vector was longer than the memory                   |

A channel is enabled when its mask bit is set **and** it is among the lowest
`CH_COUNT` channels. Disabled channels get no data of either stream.

### Using it: one query batch

1. Write HDR and CTRL.b2 (the header format). Write CH_MASK and CH_COUNT
   (the channels to use).
2. Write RELOAD with the enabled channels. Write CTRL with b1 = 1 to restart
   the reference splitter.
3. Send one reference vector per enabled channel into the reference stream.
   Vector *k* goes to the *k*-th enabled channel.
4. Poll LOADED until all enabled channels are set.
5. Stream the database vectors. Read every processed stream. Each channel
   returns `Hr + Hd + 1` words per database vector, in database order. A
   channel's results stop when its processed FIFO is full, and the database
   stream then stalls for all channels. Read all streams.
6. Between batches, wait until the streams are drained and BUSY is clear
   before changing header settings or reloading.

## Parameters

Top-level parameters default to the values in `sva_pkg`:

| parameter      | default | note                                                   |
|----------------|---------|--------------------------------------------------------|
| `N_CH`         | 8       | channels (the build evaluated in the article)          |
| `SPLIT_WIDTH`  | 8       | outputs per splitter (article: eight per splitter)     |
| `MASTER_DEPTH` | 512     | database and reference master FIFOs                    |
| `LINK_DEPTH`   | 16      | FIFOs between splitter levels                          |
| `DB_DEPTH`     | 512     | database FIFO per channel                              |
| `REF_DEPTH`    | 32      | reference FIFO per channel                             |
| `MEM_DEPTH`    | 2048    | reference memory per channel (vectors up to ~1,500 pairs plus headers) |
| `OUT_DEPTH`    | 64      | processed FIFO per channel                             |
| `MASTER_BRAM`  | 1       | master FIFOs: 1 block RAM style, 0 distributed RAM style |
| `DB_BRAM`      | 1       | database FIFO per channel, same encoding               |
| `REF_BRAM`     | 0       | reference FIFO per channel                             |
| `MEM_BRAM`     | 1       | reference memory per channel                           |
| `OUT_BRAM`     | 0       | processed FIFO per channel                             |

FIFO depths must be powers of two. Field widths (`ID_W`, `VAL_W`, `RES_W`)
and the header limit (`MAX_HDR`) are package constants. The 48-bit
accumulator holds up to 65,536 full-scale 16×16-bit products without
wrapping.

## What is fixed by the architecture and what was chosen

These parts come from the article:

* The block structure: master FIFOs, clone and split splitters with an
  enabled-channels input, two-level cascade, and channels built from two
  slave FIFOs, a block-RAM reference memory, a process block and a processed
  FIFO.
* The memory that wraps round and is reloaded by a signal.
* Compare-and-accumulate on matching IDs, with the result sent when either
  vector ends.
* Fixed-size, selectable headers placed before the result in a chosen order.
* A register block that handles reset, control and status, and picks which
  and how many channels to use.
* Eight channels, and eight outputs per splitter.

These were chosen here, because the article does not specify them:

* All widths, the `last` flag, and the ascending-ID rule.
* FIFO timing (first-word fall-through) and all FIFO and memory depths.
  The article lets each FIFO be block or distributed RAM. Here each buffer
  has a `*_BRAM` parameter. Block RAM style gives the array a registered
  read port, with a bypass so the port timing does not change. Distributed
  style reads the array combinationally. The defaults put the large buffers
  in block RAM and the small ones in distributed RAM. The FIFOs between
  splitter levels are always distributed.
* The drain step, the two-stage multiply-accumulate, unsigned arithmetic,
  and no normalisation in hardware.
* The split-mode quota in the cascade, the wrap-round order, and the restart
  control.
* The register map, the bus timing and the soft reset.
* Overflow handling in the reference memory.
* One clock for everything. The article's systems connect through a
  streaming core (over PCIe on a Virtex-7 board, over the AXI ACP port on a
  Zynq-7020). That core is not part of this RTL. Its FIFO and register sides
  are the top-level ports.

The article says its pipelining produces "an outcome every clock cycle".
Here that is read as one ID comparison per cycle. A result takes one whole
vector pair.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares outputs
against values computed in the testbench and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench                  | what it covers                                              |
|----------------------------|-------------------------------------------------------------|
| `tb_sync_fifo`             | random push/pop against a queue, flags, both RAM styles     |
| `tb_stream_splitter`       | clone with masks and back-pressure, rate of one word/cycle, split with quotas |
| `tb_cascaded_splitter`     | 9 channels / 3-wide splitters, clone latency, split order   |
| `tb_ref_vector_memory`     | load timing, wrap-round, reload, overflow, both RAM styles  |
| `tb_process_block`         | random pairs, both header orders, exact cycle cost per pair, stalls |
| `tb_processing_channel`    | reload with the next vector queued, back-pressure          |
| `tb_processing_system`     | 9 channels, random enable sets, end-to-end results          |
| `tb_cmd_status_regs`       | every register, enable logic, pulses                        |
| `tb_sparse_vec_accel`      | whole design through the register bus, small sizes, two-level cascade, every buffer in the non-default RAM style; counts that each mechanism (soft reset, mask, count, reload, split, clone, stall, wrap, match, cascade link, overflow) occurred |
| `tb_sparse_vec_accel_full` | the same at the default parameters, vectors of up to 1,500 pairs over 20,000 IDs |

`tb_sva_top_run` holds the body of both top-level tests, and `tb_sva_pkg`
holds the vector generator and the reference model. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sva_pkg.sv tb/tb_sva_pkg.sv tb/tb_sparse_vec_accel.sv \
    --top-module tb_sparse_vec_accel -o sim
./obj_dir/sim
```

The testbenches set every variable they read, so they also run with random
initial values (`+verilator+rand+reset+2`).

## Limits

* No timing or resource figures: the RTL has not been through FPGA
  implementation.
* The design has no hardware normalisation. The result is a raw dot
  product.
* Reload or header changes while a database vector is in flight misalign
  the streams. This is the host's responsibility (see step 6).
* Two splitter levels allow at most `SPLIT_WIDTH²` channels. The register
  map allows at most 512.
* Every channel has its own processed stream. With hundreds of channels the
  host has many streams to read. The article names this as an open problem;
  this design does not solve it.
