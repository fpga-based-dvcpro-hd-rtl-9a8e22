# DVCPRO HD intra-frame decoder as a lock-step PE pipeline

This is a synthesizable SystemVerilog decoder for DVCPRO HD style compressed
video: 1440x1080 frames, 4:2:2 sampling, every frame coded on its own (no
motion compensation). The compressed frame is a sequence of 1215 *video
segments* of 400 bytes; each segment carries five macro blocks that come from
five distant places in the picture. The decoder turns one segment into 1280
pixels in eleven steps, each done by its own processing element (PE). The PEs
form a ten-stage pipeline that moves forward one segment at a time. All PEs
start together and the next step begins only when every PE has finished.

At the default sizes a frame takes 4,701,041 clock cycles. That is 42.5 frames
per second at 200 MHz. The real-time target is 25 fps, which allows 6584
cycles per PE per segment. The slowest PE here (the deshuffler) needs 3850.

The hardest part of the format, and of this design, is that a block's
variable-length code does not have to stay inside the block's own area. Bits
that do not fit are carried to other blocks in up to three *arrangement passes*.
The decoder has to gather them back together before it can decode anything.
That part gets the most room below.

## The compressed segment

A segment is 400 bytes: five compressed macro blocks of 80 bytes (640 bits).
Each one is laid out like this:

| bits     | content                                                     |
|----------|-------------------------------------------------------------|
| 0..23    | 3 ID bytes (ignored)                                        |
| 24..27   | STA (ignored)                                               |
| 28..31   | QNO, the quantization number of the macro block             |
| 32..639  | eight block areas: Y0 Y1 Y2 Y3 Cr0 Cr1 (80 bits each), Cb0 Cb1 (64 bits each) |

Every block area starts with DC (9 bits, signed), the DCT mode (1 = 8-8-field,
0 = 8-8-frame) and a 2-bit class. The rest of the area holds the AC
coefficients in zigzag order as variable-length codewords, ending with EOB.

The code table is defined in `rtl/dvc_pkg.sv`. It has the same shape as the
standard's: codewords of 3 to 16 bits with the sign included, a 4-bit EOB
(`0110`), a run-only code (`111110` + 6 bits = that many zeros plus one) and an
amplitude escape (`111111` + 9-bit amplitude + sign). **It is not the table of
the SMPTE standard.** The same is true of the quantizer steps, the weights and
the shuffle order described below. The structure of the decoder does not
depend on these tables. To decode real DVCPRO HD material you would replace
`vlc_len`/`vlc_decode`, `qstep`/`weight` and the address formula in
`write_segment` with the standard's tables.

## Pipeline and synchronisation

| stage | PE                  | module             | work per segment                                  | cycles |
|-------|---------------------|--------------------|---------------------------------------------------|--------|
| 0     | Transfer            | `transfer`         | 100 words from CompressedFrame into the segment buffer | ~105 + memory latency |
| 1     | VSParser            | `vs_parser`        | QNO, DC, mode, class of the 40 blocks              | ~500   |
| 1     | VLCParserPass1      | `vlc_parser_pass1` | pass 1 (below)                                     | 2563   |
| 2     | VLCParserPass2      | `vlc_spill_pass`   | pass 2                                             | up to ~2000 |
| 3     | VLCParserPass3      | `vlc_spill_pass`   | pass 3                                             | up to ~2000 |
| 4     | InverseVLC          | `inverse_vlc`      | bit strings to quantized coefficients              | 41 + bits + 4/block |
| 5     | InverseQNOWght      | `inverse_qno_wght` | dequantization and weighting                       | 2563   |
| 6     | IDCTStage1          | `idct_stage` (rows)    | 320 one-dimensional IDCTs                      | ~2570  |
| 7     | IDCTStage2          | `idct_stage` (columns) | 320 one-dimensional IDCTs, 8-bit pixels        | ~2570  |
| 8     | Deshuffle           | `deshuffle`        | 8x8 blocks to 16x16 macro block rasters            | ~3850  |
| 9     | WriteSegment        | `write_segment`    | 1280 pixel words into DecompressedFrame            | 1281 + stalls |

`decoder_controller` counts iterations. In iteration *i*, stage *k* works on
segment *i − k* when that segment exists. A frame therefore takes
NUM_VS + 9 = 1224 iterations. In each iteration the controller sends one
start pulse, together with the segment index, to every stage that has a
segment. It also tells `signal_combiner` which PEs take part. Each PE answers
with a one-cycle `done`. The combiner keeps sticky flags and pulses `all_done`
once the last one has arrived. The controller starts the next iteration two
cycles after that. PEs with nothing to do while the pipeline fills or drains
are not waited for.

`clock_counter` stamps each PE's start and done pulses. The top exposes the
last duration and the frame maximum (`pe_last_cycles`, `pe_max_cycles`, in the
PE order of the table) and a free-running `cycle_count`. The maxima are
cleared at `frame_start`.

### Buffers

All data moves between PEs through simple dual-port RAMs (`bank_ram`: one
write port, one registered read port, read-before-write). The upper address
bits of every buffer are low bits of the segment index. This turns one RAM
into a ping-pong or multi-bank buffer, so a PE can write segment *s* while its
consumer reads segment *s − 1*:

* Buffers between neighbouring stages use 2 banks (segment bit 0). These are
  the segment buffer, coefficients and masks, dequantized values, IDCT
  intermediate values, pixels and macro block rasters.
* The pass-1, pass-2 and pass-3 bit strings use 4 banks (segment bits 1:0).
  They are written in stages 1 to 3 and all read in stage 4.
* The block parameters (QNO, DC, mode, class) use 8 banks (segment bits 2:0).
  They are written in stage 1 and read in stages 5 and 8.

The segment buffer exists twice, so that the segment parser and the pass-1
parser can read it in the same stage.

## Gathering the codewords: the three arrangement passes

The encoder first puts each block's codewords into the block's own area. A
busy block overflows its area. A quiet block leaves room after its EOB. The
overflow is placed in the free room in three steps:

1. **within the block**: as much as fits in the block's own area;
2. **within the macro block**: into the free room of the other blocks of the
   same macro block;
3. **within the segment**: into the free room anywhere in the segment.

Anything still left is dropped. That block then loses its last coefficients.

The decoder reverses these steps in the same order. All three parsers run
bit-serially, one bit per cycle, with a *prefix tracker* (`trk_t` in
`dvc_pkg`). The tracker holds the bits of the codeword in progress,
left-aligned, and `vlc_len` finds the codeword length as soon as the prefix
fixes it. Only when a codeword is complete can the parser tell whether it was
EOB. A codeword that is cut off at the end of one pass is carried over, so the
next pass continues it seamlessly.

* **Pass 1** (`vlc_parser_pass1`) walks the 40 block areas. Bits up to and
  including EOB go to the block's pass-1 bit string. If EOB is reached, the bits
  after it are appended to the macro block's *pool*. The order is block order
  within the macro block, areas in order. If the area ends first, the block
  stays open. Its bit count and any unfinished codeword go into a 55-bit block
  state (`blk_state_t`: done flag, three lengths, tracker).
* **Pass 2** (`vlc_spill_pass`, one group per macro block) streams each
  macro block's pool into the first open block of that macro block. When that
  block reaches EOB, the stream moves on to the next open block. Once every
  block of the macro block is closed, the remaining pool bits go to the
  segment pool.
* **Pass 3** (the same module, one group of all 40 blocks) streams the segment
  pool the same way over all blocks of the segment. The bits still left at the
  end are discarded.

This is only the decoder half of the rule. It works because the encoder filled
free room in the same order in which the decoder drains it. Blocks that are
still open after pass 3 are *truncated*. They keep every coefficient whose
codeword arrived complete.

Each pass adds bits to a separate bit string (1024 bits per block and pass).
`inverse_vlc` then reads the three strings of a block one after the other, as
one stream, using the three lengths in the final block state.

## From codewords to pixels

**Inverse VLC.** Each complete codeword becomes (run, amplitude, sign). The
zigzag index advances by the run. A non-zero amplitude is written at
`ZZ[k]` in the coefficient buffer, and bit `ZZ[k]` is set in the block's
64-bit non-zero mask. Positions whose mask bit is clear are zero. This saves
clearing 2560 coefficient words for every segment. The usual JPEG zigzag is
used for both DCT modes.

**Dequantization and weighting.** Each coefficient is computed as:

* DC = 4 × dc.
* AC = sign × ((|q| × (step[QNO] << class) × W) >> 4), saturated to ±2047,
  with:
  * step = {1,1,2,3,4,5,6,7,8,16,18,20,22,24,28,52}
  * W = 16 + u + v for luma
  * W = 16 + 2(u + v) for chroma (blocks 4..7 of a macro block)

**IDCT.** There are two one-dimensional stages, rows then columns. Both use the
Loeffler–Ligtenberg–Moschytz flow graph with 12 multiplications and 13-bit
constants:

* Stage 1 keeps two extra fraction bits: `(x + 2^10) >>> 11`, stored as 20 bits.
* Stage 2 removes them, adds the level shift of 128 and clips:
  `clip((x + 2^17) >>> 18 + 128)`.

The result is within ±1 of a floating-point orthonormal IDCT. Each stage reads
one element per cycle. It writes the previous vector while reading the next
one.

## Deshuffling and placement

**Macro block raster.** `deshuffle` builds a 16×16 raster from Y0 Y1 (top) /
Y2 Y3 (bottom) and the two Cr and two Cb blocks. Chroma is 4:2:2, so a chroma
block covers 16×8 luma pixels and is read at column x/2. In 8-8-field-DCT mode
the upper block of each vertical pair holds the even lines and the lower block
the odd lines, and the deshuffler interleaves them again. In frame mode the
upper block holds lines 0..7. The mode comes from the first block of the macro
block. Each pixel is written as one word `{8'h00, Y, Cb, Cr}`, which is where
4 bytes per pixel in the frame buffer come from.

**Position in the frame.** `write_segment` places macro block *k* (0..4) of
segment *s* as frame macro block *n = k·NUM_VS + s*, counted in raster order
with FRAME_W/16 macro blocks per row. 1080 is not a multiple of 16, so 8 lines
are left over at the bottom. They are covered by 45 macro blocks of 32×8
pixels: the 16×16 raster is written two raster rows per frame line. The
writer issues one write per cycle and holds while `fr_ready` is low.

## Interfaces

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `frame_start` | in | pulse: a compressed frame is in CompressedFrame, decode it |
| `frame_done`, `busy` | out | pulse when the last pixel has been written; frame in progress |
| `cf_req`, `cf_addr[16:0]`, `cf_ready` | out/out/in | read request; accepted when `cf_ready` |
| `cf_rvalid`, `cf_rdata[31:0]` | in | read data, in request order, any latency |
| `fr_we`, `fr_addr[20:0]`, `fr_wdata[31:0]`, `fr_ready` | out/out/out/in | pixel write; held until `fr_ready` |
| `cycle_count`, `pe_last_cycles`, `pe_max_cycles` | out | profiling |

CompressedFrame word `seg*100 + i` holds bytes 4i..4i+3 of the segment,
big-endian. DecompressedFrame word `y*FRAME_W + x` holds pixel (x, y). Both
memories sit outside the design (on the original platform, DDR shared with the
host). The host software that fills one buffer and empties the other is also
outside.

Parameters of the top: `FRAME_W = 1440`, `FRAME_H = 1080`,
`NUM_VS = FRAME_W*FRAME_H/1280` (1215), `CF_AW = 17`, `FR_AW = 21`. A smaller
frame works if its width is a multiple of 32, its height a multiple of 8 and
width × height a multiple of 1280 (a whole number of segments).

## What comes from the original design, and what is this design's own

The following follow the original description:

* the decomposition into the PEs listed above, with the three arrangement
  passes as separate PEs and the IDCT as two 1-D Loeffler stages;
* lock-step synchronisation through a signal combiner and a controller;
* data exchange through block RAM;
* per-PE cycle instrumentation;
* the frame size, 1215 segments of five macro blocks, both buffer sizes
  (486000 and 6220800 bytes), and the 6584-cycle real-time budget at 200 MHz
  and 25 fps.

The following are choices of this design:

* the assignment of PEs to stages;
* the segment-indexed banking of buffers;
* the start/done pulse protocol and the memory port handshakes;
* bit-serial parsing;
* the non-zero masks;
* the arithmetic precision;
* the pixel word format and the bottom-strip geometry.

As noted above, the VLC table, quantizer and weight tables and the shuffle
order are also stand-ins for the standard's.

The per-PE cycle counts differ from the original's. The original's slowest PE
was also the deshuffler, at 3764 cycles against 3850 here. The VLC passes here
are faster, and the IDCT stages and the segment writer are shorter.

## Verification

Every module has its own self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Most of them compare
against `tb/dv_ref_pkg.sv`. This package is an independent model written
directly from the format description above. It contains:

* an encoder (`SegGen`) that makes random segments of selectable busyness;
* a model of the three-pass arrangement on the encoder side, which works out
  where every bit lands and which blocks end up truncated;
* a floating-point decoder that gives the expected pixels;
* the macro block placement.

| testbench | what it checks |
|-----------|----------------|
| `tb_dvcpro_hd_decoder_full` | full 1440×1080 frame at default parameters. Every pixel within ±1 per component of the floating-point reference. Frame ≤ 8,000,000 cycles and every PE ≤ 6584 cycles per segment. Memories with latency and random `cf_ready`/`fr_ready` stalls. Counts of blocks finished in pass 1/2/3, truncated blocks, field and frame macro blocks, escapes, run-only codes, bottom-strip macro blocks and stalls, each of which must be non-zero. Decoding quality against the number of passes (see below). |
| `tb_dvcpro_hd_decoder` | the same at 160×104 (13 segments), for quick runs |
| `tb_vlc_parser_pass1`, `tb_vlc_pass2`, `tb_vlc_pass3` | bit strings, block states, pools and leftovers against the encoder model |
| `tb_inverse_vlc`, `tb_inverse_qno_wght`, `tb_idct_stage1`, `tb_idct_stage2` | coefficients, dequantized values, and IDCT results against independent models |
| `tb_vs_parser`, `tb_transfer`, `tb_deshuffle`, `tb_write_segment` | parameter extraction, memory transfer with latency and stalls, raster assembly in both modes, frame placement including the bottom strip |
| `tb_signal_combiner`, `tb_decoder_controller`, `tb_clock_counter`, `tb_bank_ram` | exact pulse timing, iteration/segment sequence of a 1215-segment frame, durations and saturation, read-during-write |

**Quality against the number of passes.** The end-to-end testbenches also
repeat the experiment that motivates implementing all three passes. They
compute the PSNR, over all three components of every pixel word, of three
decodes:

* pass 1 only (reference model);
* passes 1 and 2 (reference model);
* the decoder's own three-pass output.

Each is compared with a decode of every coded coefficient, and the PSNR must
rise with each pass. On the full frame the results are 13.05, 13.83 and
14.07 dB. The random test content is far busier than natural video: about
30 % of the blocks lose data even after pass 3. So only the trend means
something, not the absolute values.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/dvc_pkg.sv tb/dv_ref_pkg.sv tb/tb_dvcpro_hd_decoder_full.sv \
    --top-module tb_dvcpro_hd_decoder_full -o sim
obj_dir/sim
```

Replace the testbench name for the others. The full-frame run simulates
about 4.7 million cycles and takes seconds to a few minutes, depending on the
machine.

## Files

* `rtl/dvc_pkg.sv`: constants, types, code table, zigzag, quantizer and weight functions.
* `rtl/dvcpro_hd_decoder.sv`: the top level.
* `rtl/<pe>.sv`: one file per PE (see the pipeline table).
* `rtl/signal_combiner.sv`, `rtl/decoder_controller.sv`, `rtl/clock_counter.sv`: control and profiling.
* `rtl/bank_ram.sv`: the inter-PE RAM.
* `tb/dv_ref_pkg.sv`: the reference model.
* `tb/tb_*.sv`: the testbenches.
