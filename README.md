# Embedded frame compressor/decompressor for a video decoder

A video decoder spends much of its memory bandwidth and power on the reference
frames in external SDRAM. The deblocking filter writes every reconstructed
frame there, and motion compensation (MC) reads parts of it back many times.
This design sits between the decoder and the memory. It compresses every 4x4
pixel block to exactly half its size on the way out and restores it on the way
in.

The ratio is fixed at 2:1, so a 128-bit block (16 pixels of 8 bits) always
becomes one 64-bit *segment*. That has two consequences:

- Any block can be fetched on its own, at an address computed by wiring.
  Motion compensation needs this random access.
- The coding is lossy. It has to decide, block by block, which information
  fits in the 64 bits.

The codec is a 4x4 2-D DCT followed by *coarse grain bit-plane zonal coding*
(CGBPZ). The coded data is sent from the most to the least significant bit
plane and cut off when the budget runs out. A decompressor rebuilds the
coefficients, adds a small correction for the bits that were cut, and runs
the inverse DCT.

The RTL implements the scheme described in the 2008 NCTU master's thesis
*Design of An Embedded Compressor/Decompressor for Mobile Video Applications*.
Its target is an H.264 decoder for 1080-line HD at 30 frames/s, clocked at
100 MHz. The thesis fixes the main pipeline structure and timings: 72 cycles
per macroblock to compress and 34 to decompress. It leaves a number of details
open, such as bit orders, fixed-point widths and handshakes. Where this RTL
fills them in, it is noted below and in the opening comment of each file.

## The 64-bit segment

```
 63      56 55    50 49                                                   0
+----------+--------+------------------------------------------------------+
|    DC    | start/ |  AC field (50 bits), filled from bit 49 downwards:    |
|  8 bits  |  end   |  zone fields | sign bits | plane contents | fill bits |
+----------+--------+------------------------------------------------------+
```

- **DC** (8 bits) is the block's DC coefficient divided by 4 with rounding,
  i.e. the block mean. The decoder multiplies it back by 4.
- **start/end** (6 bits) names the highest coded bit plane *s* and the lowest
  coded plane *e* (0 <= e <= s <= 8) as `s*(s+1)/2 + e`. That leaves 45 codes.
  The value 63 means that all AC coefficients are zero.
- **Zone fields**: one 4-bit field `{RMAX-1, CMAX-1}` per coded plane, plane
  *s* first.
- **Sign bits**: one per AC position inside the *sign zone*, in raster order.
- **Plane contents**: for each coded plane, plane *s* first, the bits inside
  that plane's own zone, in raster order.
- **Fill bits**: bits of plane *e-1*, taken inside the sign zone in raster
  order, for as many positions as the budget still has room for.

The field order (DC, start/end, all zones, signs, contents) follows the
thesis's block diagram of the compressor. The triangular start/end numbering,
the raster scan inside a zone and where the fill bits sit are this design's
own choices.

## How CGBPZ decides what fits

The 15 AC coefficients are split into a sign and a magnitude. The magnitude
saturates at 511, giving nine magnitude bit planes (plane 8 is the most
significant) and a sign plane. Position `i = 4*v + u` holds vertical frequency
*v* and horizontal frequency *u*. Position 0 is DC and belongs to no plane.

**Zone.** For each plane, RMAX and CMAX are the smallest row and column counts
whose rectangle, anchored at the top left, encloses every 1 of that plane. DCT
energy gathers at low frequencies, so this rectangle is usually small. A plane
is stored as its 4-bit zone plus the `RMAX*CMAX - 1` bits inside it (DC is
excluded). Unlike finer-grained zonal coders, CGBPZ stores every plane the
same way and does not use the previous plane's zone. That costs some bits but
makes the hardware regular.

**Start plane.** The start plane is the highest plane that holds a 1.

**Sign zone.** A sign is only worth storing for a coefficient that some coded
plane can make nonzero. The sign zone is therefore the union (largest RMAX and
largest CMAX) of the zones of the coded planes. Its size is not stored,
because the decoder can derive it from the zone fields.

**End plane.** Walking down from the start plane, coding planes *s* to *N*
costs

```
used(N) = sum over p = N..s of (4 + RMAX_p*CMAX_p - 1)  +  (RMAX_sign*CMAX_sign - 1)
```

The end plane *e* is the lowest *N* with `used(N) <= 50`. A single plane costs
at most 4 + 15 + 15 = 34 bits, so the start plane always fits.

**Fill.** `50 - used(e)` bits are left over. They carry the bits of plane
*e-1* at the sign-zone positions, in raster order, until the field is full.
The sign zone is used for the fill because the decoder already knows the
signs of those positions.

**Compensation (decoder).** Every bit below a coefficient's lowest received
plane has been dropped, so the truncated value is on average too small. For a
nonzero magnitude the decoder therefore sets a 1 in the plane just below the
lowest plane it received for that position. This adds half of the lost range.

- For an ordinary position, the lowest received plane is *e*, so the 1 goes
  into plane *e-1*. This is the thesis's rule.
- For a position that also received a fill bit, the 1 goes into plane *e-2*.
  This extension is this design's own.
- No compensation is applied when the lowest received plane is plane 0.

## Compressor hardware

`ec_compressor` has three pipeline stages of four cycles each. Four cycles is
the time the deblocking filter takes to deliver a 4x4 block at 4 pixels per
clock.

| stage | cycles | work |
|---|---|---|
| 1 | one per incoming row | row DCT (one `dct4_1d`) into a ping-pong transpose buffer |
| 2 | 4 | column DCT, one column per cycle (second `dct4_1d`) |
| 3 | 4 | `cgbpz_encoder`: analysis (1 cycle, registered), packing (1 cycle, registered); the segment is presented at the end of the stage |

The first segment appears 12 cycles after the block's first row. After that,
one segment appears every 4 cycles, so the sixteen blocks of a macroblock take
72 cycles. The compressor testbench checks both numbers.

Inside `cgbpz_encoder`:

- **`rmax_cmax_calc`** (combinational) builds the nine magnitude planes and
  the sign plane. It also produces each plane's zone, the plane's content
  compacted to the left of a 15-bit word (raster order within the zone), and
  the start plane.
- **`end_plane_decision`** is the walk above, unrolled into nine
  adder/comparator steps so that it takes no clock cycle. The 8-bit
  accumulator is wider than the 6-bit adder of the thesis, because the sum can
  exceed 63 before the comparison.
- **`se_plane_mux`** packs the 4-bit start and end planes into the 6-bit
  start/end field.
- **The ripple connector chain** serialises everything in one cycle. This is
  the part of the design that takes the most explaining:

  ```
  result = { content[14 -: k], prev[49 : k] }      k = RMAX*CMAX - 1  (0..15)
  ```

  One `ripple_connector` link shifts the word built so far (`prev`) down by
  *k* bits and puts the first *k* content bits on top. *k* is chosen by a
  16-way mux on the 4-bit zone. Because each link pushes at the top, links are
  chained in the *reverse* of the final field order, and anything pushed out
  at the bottom is lost. The encoder has ten links: planes 0 to 8, then the
  sign plane with the sign zone. Each plane's link gets one of three inputs:

  - a coded plane (*e..s*) gets its own zone and content;
  - plane *e-1* gets the sign zone and its bits at the sign-zone positions,
    which makes it the fill;
  - any other plane gets the 1x1 zone and so contributes *k* = 0 bits.

  After the sign link, the 4-bit zone fields are shifted in on top the same
  way, from plane *e* up to *s*.

  What the fill plane had in excess of the free space falls off the bottom.
  This is how the fill adapts to the budget without any counter.

## Decompressor hardware

`ec_decompressor` has two stages of two cycles each. Two cycles per stage is
set by the 32-bit memory bus: a segment arrives as two words, bits 63:32
first.

| stage | cycle 1 | cycle 2 |
|---|---|---|
| 1 | store the first word | `cgbpz_decoder` decodes the full segment; coefficients registered |
| 2 | four shared `dct4_1d` units transform the four columns | the same units transform the four rows; round, clip to 0..255, register |

A block is available 4 cycles after its first word arrives. With words
arriving back to back, one block follows every 2 cycles: 4 + 15 x 2 = 34
cycles per macroblock, as in the thesis.

`cgbpz_decoder` is combinational. It works in three steps:

1. It reads the start/end code and the zone fields, and forms the sign zone.
2. A chain of `ripple_disconnector` links peels the fields off the top of the
   AC field. Each link is the inverse of a connector: it takes *k* bits off
   the top, expands them into their zone, and shifts the rest up. The sign
   bits come first, then planes *s* down to *e*. The fill bits come last,
   limited to `50 - used`.
3. Compensation is applied, and then the signs.

## Transform and fixed point

`dct4_1d` is the orthonormal 4-point DCT. It uses a butterfly and three 8-bit
constants: 1/2 = 128/256, cos(pi/8)/sqrt2 = 167/256 and sin(pi/8)/sqrt2 =
69/256. Every output is rounded half up after a right shift by `SHIFT`.

| pass | input | output | SHIFT |
|---|---|---|---|
| forward rows | 9-bit signed pixel | 13 bits, 2 fraction bits | 6 |
| forward columns | 13 bits | 12-bit integer coefficient (DC 0..1020) | 10 |
| inverse columns | 14 bits (coefficient) | 14 bits, 2 fraction bits | 6 |
| inverse rows | 14 bits | 18 bits, 4 fraction bits, then `(v+8)>>>4` and clip | 6 |

The thesis does not give the constant precision or the internal widths. They
were chosen to keep two fraction bits between the passes, so the transform's
own rounding stays small next to the coding loss. The transform testbench
compares every output both with the real-valued DCT, within the error the
8-bit constants allow, and with the exact fixed-point product of the reference
model.

## System integration (`ec_codec_top`)

```
 deblocking filter --df_*--> ec_compressor --seg+tag--> write sequencer --+
                                                                          |
                                                 ec_addr_map --mem_addr--> SDRAM (32-bit words)
                                                                          |
 MC --mc_req/mc_addr--> read sequencer ------------------------------------+
 MC <--mc_rdata/mc_data_ready-- ec_mc_buffer <-- ec_decompressor <-- mem_rvalid/mem_rdata
```

**Addresses.** The deblocking filter and MC keep using uncompressed addresses
`{y, x/4}`, one 32-bit word per 1x4 row with a line pitch of 512 words.
`ec_addr_map` turns the address of any row of a block into
`{0, y/4, x/4, word}`. The two words of a segment are therefore adjacent, and
a compressed frame fills half the address space.

**Write path.** Each segment becomes two consecutive writes. Writes have
priority on the single memory port. The compressor leaves the port free at
least two cycles out of every four.

**Read path.** MC requests a block with `mc_req` and `mc_addr`, giving the
address of any of its rows. The read sequencer issues its two reads when the
port is free. It takes the next request in the cycle the previous block's
second word goes out, so back-to-back requests keep one read per cycle on the
port. Memory may return the words with any latency, but in order.

**MC buffer.** MC must receive its data as an unbroken stream, so
`ec_mc_buffer` (9 blocks, the most any 4x4 prediction needs: a 9x9 area with
fractional motion in both directions) collects decoded blocks. MC drives
`mc_need` with the number of blocks it must see before it can start. It then
holds back its read enable until `mc_data_ready`. The count is either all
blocks of the fetch (1, 2, 3, 4, 6 or 9) or, for a streaming start, only those
the decoder cannot deliver in time once MC reads at one word per cycle. MC
then reads exactly the 1x4 words it would have read from an uncompressed
frame, one per cycle. For a 9x9 area that is nine pixel lines of three words.
Each word is named by:

- the block's position in the fetch (`mc_rd_blk`, in request order);
- the row inside that block (`mc_rd_line`).

An assertion checks that every read names a block already in the buffer. A
one-cycle `mc_release` frees the fetch's `mc_rel_cnt` blocks. Blocks of the
next fetch may already arrive while the current one is being read. A write
into a full buffer sets a sticky `buf_overflow` and drops the block.

**Timing.** With the memory port free, `mc_data_ready` rises 2n + 4 + L
cycles after the first request is accepted, for n blocks and a memory read
latency of L cycles. The end-to-end testbench checks this with L = 2. The
parts are:

- 1 cycle to the first read;
- 2 reads per block;
- L cycles in the memory;
- 3 cycles in the decompressor after the last word;
- 1 cycle to enter the buffer.

**Memory traffic.** Writes take 2 words per block instead of 4. Reads take 2
words per reference block, where MC would read 4 to 27 rows per fetch. With
the thesis's mix of motion-vector cases the end-to-end testbench measures
0.616 words read for every word MC would read from an uncompressed frame,
and checks that it stays below 0.65. The thesis reports 0.625 for its test
sequences.

## Where this departs from, or adds to, the thesis

- **Bit-level format.** The following are this design's own choices: the
  start/end numbering, the raster scan inside zones, the two-word order on the
  bus, the position of the fill bits, and the DC rounding. A decoder written
  for the thesis's own hardware would not read these segments.
- **Order of the sign bits.** The compressor block diagram places the sign
  bits between the zone fields and the plane contents, and that order is
  used. The thesis's encoding flowchart packs the sign bits last.
- **Usage count.** The end-plane usage counts the sign bits as well as the
  zones and contents. The thesis describes the accumulation only in outline.
- **Compensation.** Positions that received a fill bit are compensated one
  plane lower. The thesis's rule covers only plane *e-1*.
- **Sequencers, arbitration, the MC buffer handshake and the address layout**
  are not specified in the thesis and are this design's own.
- **MC timing.** The thesis averages 19.3 cycles per 4x4 block for MC plus
  decompression, within a budget of 25 at 1080p30. Its decode delays (for
  example 9 cycles for 9 blocks) mean that MC starts reading before the last
  block of a fetch is decoded. Here MC chooses that point through `mc_need`.
  - Waiting for the whole fetch costs 2n + 4 + L cycles from the first
    request, plus MC's reads.
  - With a streaming start and L = 2, the end-to-end testbench runs all nine
    motion-vector cases with the port idle. It counts from the first request
    to the last read, memory latency and request cycles included. Weighted
    by the thesis's case mix, this averages 24.5 cycles, within the budget.
  - The per-fetch start count is worked out by the MC model, not by the
    codec. It assumes one decoded block every two cycles, which holds only
    while no frame writes take the port. During writes, MC must wait for the
    whole fetch.
- **Not built:**
  - the surrounding decoder: the deblocking filter, MC and the SDRAM
    controller;
  - the fine-grain coder with its variable-length zone codebook, which the
    thesis evaluates only as a higher-quality alternative;
  - picture-quality measurement. Quality is only checked against a bit-exact
    reference model, not as PSNR on video.

## Files and hierarchy

```
ec_codec_top
 +- ec_compressor
 |   +- dct4_1d (rows), dct4_1d (columns)
 |   +- cgbpz_encoder
 |       +- rmax_cmax_calc, end_plane_decision, se_plane_mux
 |       +- ripple_connector x 10 (planes 0..8 and the sign plane)
 +- ec_decompressor
 |   +- cgbpz_decoder
 |   |   +- ripple_disconnector x 10 (sign plane, planes 8..0)
 |   +- dct4_1d x 4 (inverse, shared between columns and rows)
 +- ec_addr_map
 +- ec_mc_buffer
ec_pkg         widths, zone type, zone/segment helper functions
```

Parameters keep the thesis's numbers where it gives them: 9 planes, 64-bit
segments, a 9-block buffer and 20-bit memory addresses (`A_W`). The line
pitch, `2^X_W` = 512 words, is this design's choice and is enough for
1920x1088.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. The expected
values come from `tb/ec_ref_pkg.sv`, a sequential reference model that
contains:

- the DCT as plain matrix products;
- a CGBPZ encoder and decoder that write and read the segment one bit at a
  time.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ec_pkg.sv tb/ec_ref_pkg.sv rtl/*.sv tb/tb_ec_codec_top.sv \
    --top-module tb_ec_codec_top -Mdir obj_top
./obj_top/Vtb_ec_codec_top
```

Replace the testbench name to run any other one. What the main testbenches
check:

- **`tb_ec_codec_top`** runs at the default parameters.
  - Setup: a deblocking-filter model writes two macroblocks, and an SDRAM
    model with a two-cycle read latency stores every word.
  - Writes: every written word is compared with the reference segment at the
    mapped address.
  - Reads: an MC model fetches groups of 1, 2, 3, 4, 6 and 9 blocks, some
    while writes are still going on. It reads the 4 to 27 words of each
    motion-vector case. Every word must equal the reference decoder's output.
  - Timing: a final fetch of each size, made with the port idle, checks the
    2n + 6 cycle wait.
  - Streaming: the nine motion-vector cases run with a streaming start. Every
    read must hit a block already decoded. The weighted cycles from request
    to last read must average at most 25, and the read ratio must stay
    below 0.65.
  - Coverage: it counts reads delayed by writes, MC waits, empty, truncated
    and filled blocks, and each fetch size, and fails if any of them never
    happens.
- **`tb_ec_compressor` / `tb_ec_decompressor`** check bit-exact segments and
  pixels, and the 12/72-cycle and 4/34-cycle latencies.
- **`tb_cgbpz_encoder` / `tb_cgbpz_decoder`** run thousands of random, smooth,
  textured and noisy blocks, plus crafted worst cases.

Verilator reports a few unused signal bits. These are intended: the `used`
count in the encoder, address bits that carry no information in
`ec_addr_map`, and carry bits in package functions. It also reports a
synchronous/asynchronous mix on `rst_n`, which comes from the assertions'
`disable iff`.
