# Scalable / multi-view H.264 decoder core

A decoder meant for both quad-full-HD (4096x2160) and scalable (SVC) or
multi-view (MVC) streams has three resource problems:

- **Scheduling.** A scalable stream has several layers per macroblock (MB).
  If the layers are decoded one whole frame after another, the data passed
  between layers must go through DRAM. The per-stage work also changes a lot
  from one MB to the next.
- **Entropy decoding.** At the highest H.264 bitrate, CABAC decoding must
  produce close to two bins per clock cycle.
- **Bandwidth.** Motion compensation must fetch reference pixels without
  letting DRAM bandwidth and DRAM row latency dominate.

This SystemVerilog holds the parts of such a decoder that answer these three
problems:

- an asynchronous three-stage MB pipeline that decodes quality layers
  interleaved, MB by MB;
- a CABAC arithmetic decoder that decodes two bins per cycle by picking the
  second bin's context model from both candidates ("branch selection"), fed by
  context-model caches whose write-back can keep up when layers alternate;
- a 2D-mapped, two-way reference pixel cache in which luma and chroma share
  one tag;
- a DRAM controller that reorders accesses, issues precharge/activate out of
  order, and maps the two reference lists to different banks;
- a residual buffer that keeps all-zero and DC-only 4x4 blocks out of its
  SRAM.

The blocks that carry out standard H.264 functions are outside this core:

- CAVLC, the syntax parser, inverse transform, intra prediction,
  reconstruction, interpolation, deblocking, padding, SVC upsampling and the
  MVC tools.

The core connects to them through ports. The testbenches model the ones they
need.

## The macroblock pipeline (`mb_pipeline_ctrl`)

Each MB passes through three stages:

| Stage | Work |
|---|---|
| 0 | Entropy decoding |
| 1 | Texture decoding and prediction |
| 2 | Deblocking and padding |

The stages do not move forward together on a common beat. Each stage is
started on its own as soon as three things hold:

1. it is idle;
2. the previous stage has finished the same job;
3. the buffer behind it has room.

Condition 3 is written as `started[k] - finished[k+1] < DEPTH`, with
`DEPTH = 2`, which means ping-pong buffers between stages. So a short entropy
job can run ahead while a long prediction job is still busy. A stage only
waits when a buffer is truly full.

A *job* is one MB in one layer. With `num_layers > 1`, jobs are issued in the
order `job = mb * num_layers + layer`. All quality layers of an MB therefore
pass each stage before the next MB starts. The inter-layer data of that MB can
stay on chip instead of going through DRAM.

The interface works like this:

- The controller gives each stage a one-cycle `stage_start` pulse, together
  with the MB and layer of the job.
- The stage answers with a one-cycle `stage_done` pulse.
- `frame_done` and `frame_cycles` report the end of the frame.

## Two bins per cycle (`cabad`, `cm_cache`, `cm_mem`, `cabac_pkg`)

This is the most involved part of the design.

### Arithmetic decoding

Each binary arithmetic decoding (BAD) step follows the standard exactly:

- 9-bit range and offset;
- `rangeTabLPS` and the state transitions, generated in `cabac_pkg` from the
  standard's tables;
- renormalisation by at most 7 bits.

`cabad` chains two of these steps in one cycle.

### Branch selection

The second bin's context model usually depends on the value of the first bin,
and that value is only known partway through the cycle. Branch selection gets
around this:

1. The caller names three models: the model of bin 1 (`req_idx0`), and the
   model bin 2 would use if bin 1 is 0 (`req_idx1_0`) or if it is 1
   (`req_idx1_1`).
2. All three are read from the CM cache in the same cycle.
3. The first BAD's output picks the second BAD's model with a multiplexer.
4. Both updated models are written back to the cache at the clock edge.
5. If both bins use the same model, the second BAD sees the model as updated
   by the first.

Bit supply works as follows:

- Bits come from a 48-bit window, refilled in 16-bit words from the bitstream
  buffer.
- A request is accepted only while at least 14 bits are buffered. That covers
  two renormalisations of at most 7 bits each.
- `req_ready` is therefore the only stall. In the unit test it never drops
  while the buffer is kept full.

A request may ask for one bin instead of two (`req_two = 0`). `req_mode`
selects the decoding process:

- **Regular** (context-coded) bins, as above.
- **Bypass** bins: one or two per cycle. They use no model; each one shifts
  one stream bit into the offset and compares it with the range.
- **Terminating** bin: one per request. The range loses 2, and a 0 renormalises
  by at most one bit. After a terminating bin of value 1 the slice's code has
  ended, and the decoder is restarted with `start`.

### Context-model caches

A register cache can give three reads and two writes per cycle, which an SRAM
cannot. So the decoder reads its models from a register cache
(`cm_cache`):

- 4 groups of 8 models each;
- each group holds 8 consecutive models of one layer.

All models of all layers live in `cm_mem`:

- a single-port memory of 4 layers x 512 models;
- each entry is 7 bits: a 6-bit state and the MPS.

With layer interleaving the cache must be reloaded at every layer change, so
the reload cost matters:

- Each cached model carries a *changed* bit.
- A reload writes back only the models whose changed bit is set, one per
  cycle, then reads the 8 new models.
- A reload that names the layer and base the group already holds costs
  nothing.

A second cache of the same kind (`load_cache = 1`, `req_cm2 = 1`) is reserved
for the models of quality-enhancement texture coding. Those models are the
most used in layered streams and would otherwise evict everything else. Both
caches share the single memory port. The port goes to whichever cache is
loading; otherwise it is free for loading the initial models (`init_*`).

No syntax-element parser or context selection is included. The caller names
the models as cache indices.

## Reference pixel cache (`mc_cache`)

A cache line covers 8x2 luma pixels, plus the 4x1 Cb and 4x1 Cr pixels of the
same area: 192 bits in all. One tag serves all three components, so chroma
needs no tag check of its own. Line coordinates are `xl = x/8` and `yl = y/2`.

The 64 banks are addressed by position, not by a hash:

- bank = `{yl mod 16, xl mod 4}`;
- tag = `{list, ref_idx, xl/4, yl/16}`;
- each bank has two ways with LRU replacement.

The 64 banks tile a 32x32-pixel area. A reference window of up to 4x16 lines
(32x32 pixels) therefore touches each bank at most once and can never evict
its own lines.

Each window passes through three phases:

1. **CHECK**: one line per cycle. A miss claims the LRU way and sends the line
   address to the DRAM controller.
2. **WAIT**: waits for every fill.
3. **OUT**: hands the lines out in raster order.

## DRAM controller (`dram_ctrl`)

A DRAM row holds a tile of 4x8 lines (32x16 pixels). The address mapping is:

- bank = `{yl[3], xl[2]} ^ {list, list}`;
- row = `{list, ref_idx, yl/16, xl/8}`;
- column = `{yl mod 8, xl mod 4}`.

For backward-list pictures, the bank is the bitwise complement of the
forward-list bank. So the two windows of a bi-predicted block tend to fall in
different banks instead of fighting over one.

Up to 8 requests are queued. Each cycle the controller issues at most one
command, chosen in this order:

1. A READ for the oldest request whose row is open, even ahead of older
   requests. This is access reordering: lines of one row are read together.
2. Otherwise, a PRECHARGE or ACTIVE for the oldest request that needs a row,
   in a bank whose timing allows it, while other banks are still being read
   from. The row latency of one bank is then hidden behind another bank's data
   transfer.

A row that a queued request still needs is never closed.

Timing is counted in controller cycles:

| Parameter | Default | Meaning |
|---|---|---|
| `T_RCD` | 3 | ACTIVE to READ |
| `T_RP` | 3 | PRECHARGE to ACTIVE |
| `T_BURST` | 3 | READ to READ |

Data comes back in READ order (`dq_valid`). It leaves at once as a cache fill,
tagged with the requester's id.

On the random line stream of its unit test, the controller opens 543 rows. The
same stream in arrival order would open 2170.

## Residual buffer (`residual_buf`)

The buffer holds 24 4x4 blocks per MB (16 luma and 8 chroma) for two MBs.
Each block is classified when it is written:

- **All zero**: only a flag is set.
- **Constant** (all 16 samples equal, which is what a DC-only block becomes
  after the inverse transform): the one value is kept in a register.
- **Anything else**: written to the SRAM array.

Reads return the block one cycle later, rebuilt from whichever form it was
stored in. Counters report SRAM accesses and the rejected blocks.

## Top level (`svcd_top`)

`svcd_top` wires the blocks into the pipeline.

**Stage 0:**

- The bitstream buffer (`bs_fifo`, 32 x 16 bits) feeds `cabad`.
- `slice_start` clears the buffer and initialises the arithmetic decoder.
- The external syntax parser sends bin requests and CM loads, and reports
  `ed_done`.

**Stage 1:**

- Each job takes one reference window on `mv_*`. It is accepted only after
  that stage has been started for the job.
- The lines come out on `pix_*`. The last line (`pix_last`) ends the job.
- The residual buffer is reached through `res_*`.

**Stage 2:**

- Deblocking is external and reports `db_done`.

The DRAM command and data pins, and all event counters, are ports.

## Parameters at their defaults

| Parameter | Value | Origin |
|---|---|---|
| CM cache | 4 groups x 8 models | published design |
| CM memory | 4 layers | published design |
| CM memory | 512 models per layer | own choice |
| Reference cache | 64 banks (16x4), 2 ways, 8x2 luma line | published design |
| DRAM | 4 banks | published design |
| DRAM timing | T_RCD, T_RP, T_BURST = 3 | own choice |
| DRAM queue | 8 requests | own choice |
| Pipeline buffers | DEPTH = 2 | own choice |
| MB counter | 16 bits | own choice |
| Layer field | 3 bits | own choice |
| Bitstream buffer | 32 words | own choice |

The MB counter and layer field are wide enough for 4096x2160 (34560 MBs) and
for 4 quality layers.

## How far it can be trusted

Every block has a self-checking testbench that compares the block against a
model written independently in the testbench:

- `tb_cabad` encodes known bins with an H.264 arithmetic encoder written in the
  testbench, then checks every decoded bin and the CM memory traffic. The bins
  are regular, bypass and terminating. It also checks throughput: it
  requires at least 1.8 bins/cycle, and measures 1.88, on a stream in which
  about 90% of the requests ask for two bins.
- `tb_dram_ctrl` and `tb_svcd_top` contain a DRAM model. It checks the timing
  and legality of every command and returns data at a known address mapping.
- `tb_svcd_top` runs the top at its default parameters on two frames:
  - 99 MBs of one layer (QCIF);
  - 16 MBs of four interleaved quality layers.

  It checks every bin, every reference line and every residual block. It also
  counts the mechanisms below and fails if any of them never occurred:
  - stage overlap;
  - a full-buffer stall;
  - interleaved jobs;
  - two-bin cycles;
  - bypass and terminating bins;
  - CM reloads and kept groups;
  - cache hits and misses;
  - backward-list windows;
  - out-of-order ACTIVE;
  - zero and DC blocks;
  - a full bitstream buffer.

- `tb_svcd_workloads` uses the same environment on full-size frames:
  - one 4096x2160 frame (34560 MBs);
  - one 1920x1080 frame with four quality layers (32640 jobs).

  This shows that the counters and the coordinate fields hold these sizes. It
  runs in about 30 seconds.

Each testbench was also run against a copy of its module with one deliberate
fault, and each reported failures.

What is not shown:

- Power and area: the clock gating and operand isolation of the original are
  not built.
- The cycle savings of the full decoder, which depend on the blocks that are
  not built.
- Behaviour on real bitstreams.

## Where this core differs from the original chip

- **Caches.** The original also caches data for deblocking and upsampling.
  Here only the entropy-decoder caches and the reference pixel cache exist,
  because their users are the only ones built.
- **On-chip SRAM.** The memories here add up to about 5.7 KB:
  - reference cache: 3 KB;
  - CM memory: 1.75 KB;
  - residual buffer: 0.9 KB;
  - bitstream buffer: 64 B.

  The original chip has 9 KB. The rest belongs to the blocks that are not
  built.
- **Entropy throughput.** The original reports 1.95 bins per cycle on real
  streams. The figure here, 1.88, comes from a synthetic request mix. The
  decoder itself never stalls while the bitstream buffer has data, so the
  rate is set by how often the parser asks for two bins.
- **Stage 1 windows.** Stage 1 fetches one reference window per job. A real
  MB with several partitions or two reference lists fetches several; the
  window port would then be used once per partition.
- **DRAM timing.** The DRAM timing values and the row/column mapping are
  assumptions. The original gives the techniques but not the numbers.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A
watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -y rtl --top-module tb_svcd_top \
    rtl/cabac_pkg.sv rtl/svcd_pkg.sv tb/tb_svcd_top.sv
./obj_dir/Vtb_svcd_top
```

`-y rtl` lets Verilator find each module in the file of the same name. The two
packages are listed first, so they are compiled before the modules that import
them. For another block, replace `tb_svcd_top` with that block's testbench,
for example `tb_cabad`.

`tb_svcd_top` takes about a minute. It decodes the QCIF frame in 16115
cycles and the four-layer frame in 9401. The unit tests take seconds.

## Files

| File | Contents |
|---|---|
| `rtl/svcd_pkg.sv` | line geometry, line and address types, DRAM command encoding |
| `rtl/cabac_pkg.sv` | context-model type, LPS range table, state transitions |
| `rtl/mb_pipeline_ctrl.sv` | asynchronous stage scheduler with layer interleaving |
| `rtl/cabad.sv` | two-bin arithmetic decoder with branch selection and both CM caches |
| `rtl/cm_cache.sv` | context-model cache with write-back of changed models only |
| `rtl/cm_mem.sv` | layered context-model memory |
| `rtl/mc_cache.sv` | reference pixel cache |
| `rtl/dram_ctrl.sv` | DRAM controller |
| `rtl/bs_fifo.sv` | bitstream buffer |
| `rtl/residual_buf.sv` | residual buffer with zero/DC rejection |
| `rtl/svcd_top.sv` | top level |
| `tb/tb_<module>.sv` | one testbench per module |
| `tb/tb_svcd_workloads.sv` | full-size frames through the top level |
