# DRAM-side infrastructure of a 4096x2160@60fps H.264/AVC decoder

A 4096x2160 picture at 60 frames per second is 530 million pixels per second. At a 175 MHz
clock that leaves 64 cycles per macroblock (MB, 16x16 luma pixels). At that rate, external
memory bandwidth limits a decoder sooner than arithmetic does. Three kinds of traffic
dominate:

- reference-frame reads for motion compensation;
- writes of decoded frames;
- the line buffer that the deblocking filter needs between MB rows.

This RTL implements the two techniques that cut that traffic, together with the stream-side
logic that feeds the decoder:

* **Partial MB reordering (PMBR).** Entropy decoding must follow the bit stream, in raster
  order. Everything after it (the "main decoder") walks the picture in a zig-zag over regions
  4 MB rows tall instead. The entropy decoders (EDs) and the main decoder are decoupled by a
  *slice data package* (SDP) buffer in DRAM. That buffer is split into 4 rings, one per value
  of `MB row mod 4`, so the main decoder can pick its next MB from any of the 4 rows. With
  this scan, the MB below an MB in region rows 0..2 is processed a few MBs later. Its
  deblocking lines can therefore stay in a small on-chip memory, and only 1/4 of the line
  buffer traffic goes to DRAM.
* **Variable-compression-ratio lossless frame recompression (VCR-LFRC).**
  - Each decoded frame is compressed losslessly, per 8x4-pixel *partition*, before it is
    written to DRAM.
  - It is restored on the fly when the motion-compensation cache reads it back.
  - Each partition is as small as its content allows.
  - Random access is kept by a fixed slot per group of 4 partitions, plus a cached table of
    partition lengths.

The main decoder's arithmetic units are not part of this RTL: entropy decoding, inverse
transform, prediction, interpolation, the MC cache and the deblocking filter. Neither are the
DRAM controller, the PHY and the host. They connect through ports of the top module
`qfhd_decoder_top`.

## Block map

```
 bit stream ──► bsp ──► NALU buffer port                    host config / slice set-up
                 │ slice NALU addresses                            │
                 ▼                                                 ▼
           ed_dispatch ──► ed_start/ed_addr ──► (entropy decoders, outside)
                 │ slice order                       │ per-MB packages
                 ▼                                   ▼
           (main decoder) ◄── sdp_reader ◄── DRAM ◄── sdp_writer (one per ED)
                 ▲               ▲ MB order
                 │          pmbr_scan ──► md_mb_x/y
   (deblocking filter) ◄──► lb_bypass ◄──► DRAM (only row 3 of every region)
   (deblocking filter) ───► lfrc_coding ─► DRAM (compressed groups + length records)
   (MC cache)          ◄──► lfrc_restore ◄─ DRAM
                              = length_cache → addr_translate → fetch → lfrc_decompress_core
 all DRAM masters ──► dram_bus (round robin, 128-bit words) ──► DRAM interface port
```

| file | role |
|---|---|
| `dram_pkg.sv` | 128-bit word, 28-bit word address, request struct `dram_req_t` |
| `lfrc_pkg.sv` | partition constants, sample/sub-block index helpers, `glen_t` length record, `preq_t` partition request |
| `sync_fifo.sv` | valid/ready FIFO used throughout |
| `bsp.sv` | start-code search at one byte per cycle, NAL unit reports |
| `ed_dispatch.sv` | assigns slice NAL units to the first free of `N_ED` entropy decoders; records the slice order |
| `sdp_writer.sv` | one ED's packages into the 4 rings; full-ring back-pressure; start addresses per slice |
| `pmbr_scan.sv` | zig-zag MB order of the main decoder, with slice limits |
| `sdp_reader.sv` | fetches each MB's package from the ring of its row, in scan order |
| `lb_bypass.sv` | deblocking line buffer: on-chip for region rows 0..2, DRAM for row 3 |
| `lfrc_encoder.sv` | compresses one partition per cycle |
| `lfrc_coding.sv` | packs 4 coded partitions into a group slot; writes data and length record |
| `length_cache.sv` | 32-line fully associative FIFO cache of length records |
| `lfrc_addr_translate.sv` | length record → DRAM word range and bit offset of one partition |
| `lfrc_decompress_core.sv` | 5-stage decompressor, 16 samples per cycle |
| `lfrc_restore.sv` | the restore chain between the MC cache and the bus |
| `dram_bus.sv` | round-robin arbiter with an in-order response router |
| `qfhd_decoder_top.sv` | all of the above wired together |

## PMBR: scan order, SDP rings, line buffer

### Scan order (`pmbr_scan`)

The picture is cut into regions of `N_ROWS` = 4 MB rows. Inside a region, step `t` visits
local rows `r = 0..3` at column `x = t - SKEW*r`, with `SKEW` = 2:

```
t:     0  1  2  3  4  5  6  7 ...
row 0: 0  1  2  3  4  5  6  7
row 1:       0  1  2  3  4  5
row 2:             0  1  2  3
row 3:                   0  1
```

Two columns of lag per row is the smallest skew for which the left, upper-left, upper and
upper-right neighbours of every MB are decoded first, as intra prediction and motion-vector
prediction require.

- Positions outside the picture are skipped.
- So are positions outside the current slice, given as a raster-address range
  `[cfg_first_mb, cfg_last_mb]`.
- The generator examines one position per cycle.

### SDP rings (`sdp_writer`, `sdp_reader`)

Each ED owns 4 rings in DRAM, set by base and size. The ED writes each MB's package words into
ring `row mod 4` and stalls while that ring is full. When a slice starts, the writer reports
the 4 ring addresses. The host passes them to the main decoder together with the slice's MB
range (`md_slice_load`).

For each MB it receives from the scan, the reader:

1. reads one header word from the ring of that MB's row (bits [7:0] give the payload length in
   words);
2. reads the payload in bursts of at most 16 words, never past the ring's end and never past
   the writer's pointer;
3. hands the words to the Demux with the last one of each MB marked.

Its read pointers go back to the writer for the full check. The main decoder therefore runs
while the ED is still writing the same slice.

The header-word package format belongs to this design. The real package holds
variable-length-coded syntax elements, whose format is not specified here.

### Line buffer bypass (`lb_bypass`)

Per MB, the deblocking filter keeps the bottom 4 lines (8 words: 4x16 luma bytes plus 2x4x8
chroma bytes) for the MB below. The buffer stores them in one of two places:

- **Rows 0..2 of a region:** an on-chip slot indexed by `(row, x mod 4)`, 12 slots of 1024
  bits. The MB below reads the slot two scan steps later. The slot is reused four steps
  later.
- **Row 3:** the MB below lies in the next region, so these lines go to DRAM at
  `cfg_lb_base + 8*x`, one MB row's worth.

On-chip accesses take one cycle. DRAM writes move one word per cycle, and a DRAM read is one
8-word burst.

## VCR-LFRC: the compressed frame format

This is the subtlest part of the design. Everything below is shared by the encoder, the
coding block, the address translation and the decompressor. The testbench reference package
`tb/tb_lfrc_ref_pkg.sv` models the same format independently.

### Partition and sample order

A partition is an 8x4 luma block plus the two co-located 4x2 chroma blocks: 48 samples, 384
bits uncompressed. Four vertically adjacent partitions form a *group*.

- Samples are arranged as three 4x4 *units*: u0 = Y columns 0-3, u1 = Y columns 4-7, u2 = Cb
  (rows 0-1) above Cr (rows 2-3).
- Each unit is four 2x2 *sub-blocks*, so 12 sub-blocks in all. Sub-block `4u+s` holds
  residuals `n = 16u + 4s + j`.
- The decompressor emits one unit per cycle.

### Coding (`lfrc_encoder`, `lfrc_decompress_core`)

1. **DPCM.** Each sample is predicted from its left neighbour, or from the sample above in
   column 0. The top-left sample of Y, Cb and Cr (residual positions 0, 32 and 40) is kept as
   an 8-bit start value `F`.
2. **Mode.** For each 2x2 sub-block, a mode `M` (3 bits) is the smallest width that holds all
   of its residuals:
   - `M = 0`: all residuals zero, no bits.
   - `M = 1..6`: each residual is an M-bit two's-complement code. The code `100..0` stands for
     magnitude `2^(M-1)`. Its sign comes from a trailing bit `T`, 1 = positive. An M-bit code
     thus reaches one value further on either side.
   - `M = 7`: each residual is stored as 9 raw bits.
3. **Layout.** `F` (3x8 bits) | 12 modes (36 bits) | all `D` fields in sub-block order | all
   `T` bits in order. Each field's length follows from the modes alone. The decompressor can
   therefore locate every sub-block with a tree of shifters, without serial decoding.
4. **Raw fallback.** If the coded length reaches 384 bits, the partition is stored
   uncompressed and its length is recorded as 384.

The encoder is a 2-stage pipeline that accepts one partition per cycle. The decompressor has 5
stages:

1. latch the F, M and D/T parts;
2. shift the D field of the current unit down to sub-blocks;
3. split sub-blocks into residuals;
4. apply the T signs;
5. inverse DPCM.

It delivers one partition in 3 cycles (16 samples per cycle) with a latency of 4 cycles.

### Memory mapping (`lfrc_coding`, `lfrc_addr_translate`)

Each group owns a fixed 12-word slot (4x384 bits), so any group can be found without knowing
the others:

```
slot(gx, gy) = data_base + ((gy/2)*groups_per_row + gx)*24 + (gy%2)*12
```

Inside its slot, a group's coded partitions are packed back to back. Groups of even rows are
aligned to the *end* of their slot, groups of odd rows to the *start*. Two vertically adjacent
groups thus form one contiguous run of words, which suits the deblocking filter's and the MC
cache's vertical access patterns.

Each group has a 32-bit length record (`glen_t`):

- `L0`, `L1`, `L2`: 9-bit bit lengths of the first three partitions (384 = raw);
- `L3w`: a 2-bit count of the words after the word where partition 3 starts;
- `raw3`: flags partition 3 as raw;
- two reserved bits.

A 128-bit word holds the records of a 2x2 array of groups (lane `2*(gy%2) + gx%2`). The
coding block writes its record with a byte mask, so neighbours are not disturbed. The address
translation adds up the lengths to get the start bit of the requested partition, and reads
only the words that partition touches (one to four words, bit offset 0..127).

### Length cache and restore chain (`length_cache`, `lfrc_restore`)

A cache line is 4 length words, covering an 8x2 array of groups:

```
line = len_base + ((gy/2)*lines_per_row + gx/8)*4,   word = (gx/2) % 4
```

The cache has 32 lines (2 KB), is fully associative, and replaces the oldest line first. The
tag is `{frame, gy/2, gx/8}`. A hit answers in one cycle. A miss fetches the line as one
4-word burst and then answers as a hit.

`lfrc_restore` chains the stages: length cache → queue → address translation → queue → fetch
FSM → align to bit 0 → decompressor. A tag queue keeps each request alongside its 3 output
units. The length lookup of one request thus overlaps the data fetch of the previous ones.

## Stream side

- **`bsp`** consumes one byte per cycle. It writes bytes straight into the NALU buffer,
  including zeros that might begin a start code; when a start code completes, the write
  pointer is rewound over those zeros. No byte ever waits. A unit is reported as soon as its
  header byte is stored, so an ED can start on a partly received slice. Types 1-5 are slice
  units; all others are parameter units for the host.
- **`ed_dispatch`** launches each slice unit on the lowest-numbered idle engine. An engine
  that finishes a short slice takes the next slice at once. The order of launches is kept for
  the main decoder, which always decodes slices in stream order.

## DRAM bus

All masters share one 128-bit bus: the SDP writers (one per ED), the SDP reader, the LFRC
coder, the length cache, the partition fetch and the line buffer.

- A request is a write of one word with a byte mask, or a read burst of 1 to 16 words.
- `dram_bus` grants round robin among the requesting masters.
- It remembers the owner and length of up to 8 outstanding reads, and routes the in-order
  responses back to their owners.
- The DRAM interface must return read data in request order and may not stall responses.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `qfhd_decoder_top.N_ED` | 2 | entropy decoder engines |
| `NB_AW` | 20 | NALU buffer byte address width |
| `pmbr_scan.N_ROWS`, `lb_bypass.N_ROWS` | 4 | rows per reordering region |
| `pmbr_scan.SKEW` | 2 | column lag per row |
| `length_cache.NLINES` | 32 | cache lines of 4 words |
| `sdp_reader.QDEPTH` | 32 | output queue words |
| `dram_bus.OUTSTANDING` | 8 | outstanding read bursts |
| `lb_bypass.XSLOTS`, `MB_WORDS` | 4, 8 | on-chip slots per row, words per MB |

Picture size, ring placement and frame buffer addresses are run-time configuration ports.

- The position fields cover pictures up to 511x255 MBs, which includes 4096x2160 (256x135
  MBs).
- At 64 cycles per MB and 175 MHz, 4096x2160@60 needs 133 M cycles/s.
- The LFRC coder needs at most 17 bus cycles per group, against 43 available per group at that
  rate.

## Where this RTL departs from, or goes beyond, the published architecture

The following are this design's own choices, made where the architecture fixes only the
function:

- the code table for M = 0..7, including the 9-bit raw mode;
- the DPCM predictor;
- the F|M|D|T field order;
- how `L3` is counted, and the `raw3` flag;
- the SDP package framing;
- all handshakes, queue depths and the bus protocol.

Group coordinates are taken as given by the requester. The 4-pixel vertical offset between
groups and MBs is the caller's responsibility.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each ends with a line
`TB_RESULT checks=N failures=M`.

- `tb_qfhd_decoder_top` runs the whole top at its default parameters on a 6x8-MB, two-slice
  picture, plus a 16-group LFRC frame.
- It checks the NAL reports, slice launches, scan order, every SDP word, line buffer data and
  every restored unit.
- It also counts each mechanism: parameter and slice units, both EDs used, full-ring stalls,
  MBs skipped outside a slice, on-chip against DRAM line buffer accesses, raw and compressed
  partitions, length cache hits and misses. A mechanism that never occurs counts as a failure.
- `tb_workload_scan` runs the scan over whole 4096x2160, 3840x2160 and 1920x1080 frames.
  It checks the neighbour order and measures about 1 cycle per MB against the 64 available.
- `tb_workload_lfrc` codes the two bottom group rows of a 4096x2160 frame (4096 partitions)
  and restores random partitions from them. It measures about 8 pixels per cycle for the
  coder, where 3 are needed.
- The testbenches share a behavioural DRAM (`tb_dram_model.sv`: sparse, random back-pressure,
  fixed latency) and the LFRC reference model (`tb_lfrc_ref_pkg.sv`).

With plain Verilator, list the packages first:

```
verilator --binary --timing --top-module tb_qfhd_decoder_top -Irtl -Itb \
  rtl/dram_pkg.sv rtl/lfrc_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_lfrc_ref_pkg.sv tb/tb_dram_model.sv tb/tb_qfhd_decoder_top.sv
./obj_dir/Vtb_qfhd_decoder_top +verilator+rand+reset+2
```

Any other testbench runs the same way with its own name. All state that is read is reset, so the results do not depend on the initial
values.
