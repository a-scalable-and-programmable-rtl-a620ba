# Rhythmic pixel regions: an encoder/decoder pair for region-based camera pipelines

A camera pipeline normally writes every pixel of every frame to DRAM, even
though a vision task (SLAM, pose estimation, face detection) needs full detail
only in a few places. Rhythmic pixel regions move that choice into hardware:
the application describes a set of rectangular *regions*, each with its own
position, size, spatial sampling (column stride) and temporal sampling (how
often the region is captured), and only the pixels those regions ask for cross
the memory interface. Every few frames a full frame is captured anyway, so the
application can look for new things of interest.

This RTL holds the two I/O interfaces of such a pipeline:

* **`rp_encoder`** sits between the image signal processor (ISP) and the DMA
  engines. It takes the ISP's raster-order pixel stream at two pixels per
  clock, decides for every pixel whether it is sent, and produces three
  AXI4-Streams: the encoded pixels, a per-row offset and a 2-bit EncMask per
  original pixel.
* **`rp_decoder`** reads those three products back from a cache of recent
  encoded frames and answers requests for *any* pixel of the current frame,
  in any order, as if the full frame were stored.

`rp_top` instantiates both. The DMA engines and DRAM that connect them are not
part of this RTL; their connections are ports of `rp_top`.

## The EncMask: what happened to each pixel

Every pixel of the original frame gets one of four codes:

| code | name | meaning | how the decoder rebuilds it |
|------|------|---------|-----------------------------|
| `11` | R  | inside a region, captured, on a kept column | the encoded pixel itself |
| `01` | St | inside a captured region, on a column its stride drops | the nearest encoded pixel to its left in the same row |
| `10` | Sk | inside a region that is not captured in this frame | the same position in the previous cached frame |
| `00` | N  | outside every region | 0 (the decoded frame is a masked image) |

A region with stride *s* keeps one column out of *s+1*, counted from its left
edge: stride 1 drops every second column. Strides act on columns only. A
region with skip *k* is captured on one frame out of *k+1*. Where regions
overlap, the numerically largest code wins, so a pixel any region wants is
sent. On a full-frame capture every pixel is R.

Only R pixels are encoded. The **row offset** of row *y* is the number of R
pixels in rows 0..*y*-1 of the same frame. With it and the EncMask, the index
of pixel (*x*, *y*) in the encoded stream is

    offset[y] + (number of R codes in row y left of x)

which is what lets the decoder jump to any pixel without rescanning the frame.

## Encoder

```
 ISP stream ──► scan_tracker ──► region_table ──► region_matcher ──► codes
 (2 px/clk)     x, y, chunk,      descriptors of     all regions of       │
                full frame?       current chunk      the chunk, both   ┌──┴─────────────┬────────────────┐
                                                     pixels, 1 cycle   pixel_packer   row_offset_gen   encmask_packer
                                                                         │ rp_fifo        │ rp_fifo        │ rp_fifo
                                                                         ▼                ▼                ▼
                                                                    pixel stream    offset stream    EncMask stream
```

**Position and frame cycle (`scan_tracker`).** Counts accepted beats against
the configured width and height. Every `cfg_cycle_len`-th frame, starting
with frame 0, is a full-frame capture (0 disables full captures).

**Chunks (`region_table`).** The frame's rows are split into four horizontal
bands of `floor(height/4)` rows, the last band taking any remainder. The
region table has 50 entries per chunk, 200 in total, and the matcher checks
only the 50 entries of the current chunk. This keeps the parallel check small
while the frame as a whole holds 200 regions. Software must write a region
into *every* chunk whose rows it covers. Entries are written through a simple
port (`cfg_we`, `cfg_chunk`, `cfg_idx`, `cfg_region`) between frames, and
`cfg_clear` invalidates all of them. Each entry has a temporal phase counter
that restarts when the entry is written and steps at each frame end. The
entry is captured when its phase is 0, so a region written between frames is
captured on the next frame.

**Region check (`region_matcher`).** For each of the two pixels of a beat it
compares the position against all 50 descriptors at once and merges their
codes. This is the combinational heart of the encoder: 100 rectangle tests
and 100 stride remainders per clock at the default sizes.

**Pixel stream (`pixel_packer`).** The selected pixels are compacted, in
order, into two-pixel beats. TLAST must sit on the last *encoded* pixel of a
row, but which pixel that is only becomes known at the row's end. The packer
therefore always holds back at least one pixel until the row's last input
beat, then flushes it with TLAST set. That flush can be one beat or two (a
full one plus a final one), so the pixel FIFO accepts two entries per cycle.
TKEEP marks the valid lanes of a half-full last beat. TUSER marks the first
beat sent in a frame. Rows never share a beat, and a row with no encoded
pixel sends nothing.

**Offset and EncMask streams.** `row_offset_gen` emits one 32-bit word per
row on the row's first beat (TUSER on row 0, TLAST on the last row).
`encmask_packer` packs 16 codes per 32-bit word, pixel *i* of the word in bits
`[2i+1:2i]`. Each row starts a new word, and unused codes at a row's end are
0. The word holding column *x* of row *y* is
`y*ceil(width/16) + x/16`. TLAST ends each row; TUSER starts each frame.

**Timing.** A beat is accepted whenever `s_tvalid && s_tready`. Its results
reach the output FIFOs on the same clock edge and appear on the streams one
cycle later. The ISP cannot be stalled, so `s_tready` stays high on every
cycle as long as the DMA engines keep up. It drops only when an output FIFO
(8 entries) could not take a worst-case beat. The testbenches check both
cases: exactly `width*height/2` cycles per frame without back-pressure, and
correct output with random stalls.

## Decoder

`rp_decoder` takes a request (`req_x`, `req_y`) and runs a small state
machine over three read ports (row offsets, EncMask words, encoded pixels).
Each port sends a one-cycle request carrying a cache slot and an address, and
waits for a one-cycle response valid, so any memory latency works. For each
request the decoder:

1. reads `offset[y]` of the current frame's slot;
2. reads the EncMask words of row *y* from column 0 up to column *x*, adding
   up the R codes left of *x* and picking out the code of (*x*, *y*);
3. for R reads the encoded pixel at `offset + count`; for St reads the one at
   `offset + count - 1` (0 if the row has no R pixel left of *x*); for N
   answers 0; for Sk moves to the previous slot and starts again.

If the Sk walk runs past the `dec_num_frames` frames the caller says are
cached, the answer is 0. The response carries the pixel, the pixel's code in
the *current* frame and how many frames back the value came from. The caller
owns the cache layout: frame *f* sits in slot `f mod MAX_CACHE` (8 slots by
default), and `dec_cur_slot` names the current one. A lookup costs roughly
`2*(x/16 + 3)` cycles per frame visited, plus memory latency. The decoder
keeps one request in flight; it reads the row from its start rather than
keeping per-word running counts.

## Interfaces of `rp_top`

| group | signals | notes |
|-------|---------|-------|
| config | `cfg_width`, `cfg_height`, `cfg_cycle_len`, `cfg_we`, `cfg_chunk`, `cfg_idx`, `cfg_region`, `cfg_clear` | change between frames; width a multiple of 2, height at least 4 |
| ISP in | `s_tvalid`, `s_tready`, `s_tdata[47:0]` | two 24-bit pixels per beat, pixel 0 in the low bits |
| pixel out | `m_pix_t{valid,ready,data,keep,last,user}` | to DMA engine 1 |
| offset out | `m_off_t{valid,ready,data,last,user}` | to DMA engine 2 |
| EncMask out | `m_mask_t{valid,ready,data,last,user}` | to DMA engine 3 |
| status | `frame_idx`, `full_frame` | frames done; current frame is a full capture |
| decoder | `dec_req_*`, `dec_rsp_*`, `dec_cur_slot`, `dec_num_frames` | one request at a time |
| cache reads | `off_rd_*`, `mask_rd_*`, `pix_rd_*` | to the encoded-frame cache in DRAM |

`region_t` (in `rp_pkg`) is `{valid, x, y, w, h, stride[3:0], skip[3:0]}` with
16-bit coordinates. The parameter defaults are the largest configuration:
2 pixels per clock, 4 chunks of 50 regions, 24-bit pixels, 16 codes per
EncMask word, 32-bit offsets, 8 cache slots. Frames up to 65535 pixels on a
side are accepted; 3840x2160 has been simulated.

## How far to trust it, and where it is this design's own

The behaviour below follows the published rhythmic-pixel-region design:

* the four EncMask codes and their encoding;
* sending only the selected pixels in raster order;
* TLAST on the last encoded pixel of a row;
* per-row offsets counted from the frame start;
* four row chunks and 200 regions;
* the full-frame cycle length;
* two pixels per clock;
* TREADY held high;
* the decoder's fill rules;
* the cache of earlier encoded frames.

The following are choices made here, where the description is silent:

* the region descriptor format, including skip as "one frame in *skip+1*";
* strides on columns only;
* the max-merge of overlapping regions;
* which frame of a cycle is the full capture;
* the chunk boundaries and the 50-per-chunk split;
* the configuration port;
* TKEEP/TUSER, the word layouts and FIFO depths;
* 24-bit pixels;
* the decoder's memory interface and sequential row scan;
* returning 0 for N pixels and for skipped pixels not found in the cache.

The largest departure is the decoder's speed. The pipeline is meant to run
its decoder at the same two pixels per clock as the encoder. This decoder is
a functional one: a lookup takes tens to hundreds of cycles, depending on how
far along the row the pixel is. Reaching full rate would need a pipelined,
multi-request memory interface and a running-count cache per row.

Not included: the ISP, camera interface, DMA engines, DRAM and display of the
surrounding platform. The `rp_top_harness` testbench contains a behavioural
DMA-plus-DRAM stand-in that shows how to connect them.

Verification: every block has a self-checking testbench whose expected values
come from a separate model of the rules above. Each testbench also fails
against a deliberately broken copy of its block. The end-to-end tests
(`tb_rp_top` at 32x16 and 8 frames, `tb_rp_top_full` at 3840x2160,
`tb_rp_pose_720p` at 1280x720, `tb_rp_face_svga` at 800x600, the last three
with default parameters) check every stream word and decode pixels through
the cache. They also count that each mechanism occurred:

* full captures;
* all four codes;
* regions spanning chunks;
* overlaps;
* back-pressure stalls;
* partial and double row-end beats;
* empty rows;
* strided and skipped fills;
* lookups running past the cache.

The 4K run takes under a minute.

## Simulating

Every file in `rtl/` is plain SystemVerilog; the package must be read first.
From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/rp_pkg.sv \
    rtl/rp_fifo.sv rtl/region_table.sv rtl/scan_tracker.sv rtl/region_matcher.sv \
    rtl/pixel_packer.sv rtl/row_offset_gen.sv rtl/encmask_packer.sv \
    rtl/rp_encoder.sv rtl/rp_decoder.sv rtl/rp_top.sv \
    tb/rp_top_harness.sv tb/tb_rp_top.sv --top-module tb_rp_top -o sim
./obj_dir/sim
```

(`-Wno-fatal` stops width warnings in the testbenches from ending the build; the RTL itself builds without warnings here.) Swap the last testbench file and `--top-module` for any other `tb/tb_*.sv`
(the block testbenches need only `rp_pkg.sv`, their block and the blocks it
instantiates). Each prints `TB_RESULT checks=N failures=M`. To change the
design size, override the parameters of `rp_top` (`CHUNK_REGIONS`,
`NUM_CHUNKS`, `MAX_CACHE`, ...). To change the frame size, drive
`cfg_width`/`cfg_height`; in the harness, set its `W`/`H` parameters.
