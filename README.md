# Bit-plane comparison codec for video frame memory

A video decoder keeps its reference frames in external memory. Motion
compensation reads them back over and over, so this traffic costs much of the
power of a mobile decoder. This codec sits between the decoder and the memory.
It compresses every 4x2 block of 8-bit pixels (64 bits) into one 32-bit word
before the block is written, and expands it again when it is read.

The compression ratio is always exactly 2. Every block therefore has a fixed
address in memory, and a block can be fetched alone with one 32-bit access.
This is the reason to use a lossy fixed-ratio scheme instead of a better
variable-length one. The loss comes from dropping low-order bit planes; the
scheme spends its 32 bits on the planes that matter most in each block.

The codec processes one block per clock cycle in both directions:

- the **compressor** is a 2-stage pipeline, so a block takes 2 cycles and a
  16x16 macroblock (32 blocks) takes 33 cycles;
- the **decompressor** has a single stage, so a block takes 1 cycle and a
  macroblock takes 32 cycles.

The algorithm, the segment format, the pattern table, the pipeline split and
the cycle counts follow a published design: a predefined bit-plane comparison
coding (PBCC) proposed for embedded compression in an H.264 decoder. Where
that description leaves something open, this RTL makes its own choice. Those
choices are listed in "Interpretations and own choices" below.

## The 32-bit segment

| bits  | field         | meaning                                                       |
|-------|---------------|---------------------------------------------------------------|
| 31:30 | mode          | which fixed values the skipped top planes have (mode 1..4 stored as 0..3) |
| 29:28 | start plane   | SP: how many planes, counted down from the MSB, are skipped (0..3) |
| 27:26 | pattern L     | left 2x2 half: group A, B, C (0..2) or no comparison (3)       |
| 25:24 | pattern R     | the same for the right half                                   |
| 23:12 | coded data L  | left half: four 3-bit pattern indices, or three raw 4-bit planes |
| 11:0  | coded data R  | the same for the right half                                   |

`pbcc_pkg::seg_t` is this layout as a packed struct.

Pixels in a block are numbered as follows. The top row is `0 1 4 5` and the
bottom row is `2 3 6 7`. Pixels 0-3 form the left 2x2 half and pixels 4-7 the
right half.

A *bit plane* Bk is bit k of every pixel. Over the whole block it is an 8-bit
value, 0x00 when no pixel has the bit and 0xFF when all do. Over one half it
is a 4-bit nibble, with the half's first pixel in bit 3. The pattern `1110`
therefore means that pixels 0, 1 and 2 of the half have the bit and pixel 3
does not.

## How a block is compressed

### 1. Pixel truncation (stage 1)

First the block's average (the sum divided by 8, rounded down) and its spread
(max - min) are computed. A smooth block whose average lies in one quarter of
the range is then pulled entirely into that quarter:

| type | condition                        | clamp                                   |
|------|----------------------------------|-----------------------------------------|
| 1    | avg < 64, diff < 32              | pixels >= 64 become 63                  |
| 2    | 64 <= avg < 128, diff < 64       | < 64 become 64, >= 128 become 127       |
| 3    | 128 <= avg < 192, diff < 64      | < 128 become 128, >= 192 become 191     |
| 4    | avg >= 192, diff < 32            | < 192 become 192                        |
| 5    | anything else                    | unchanged                               |

After this step, planes B7 and B6 of a type 1-4 block are constant. That is
what the next step exploits.

### 2. Selective bit plane: mode and start plane

A segment has room for 3 or 4 planes per half, so the codec looks for top
planes that it does not need to store. Each mode fixes the values of B7, B6
and B5:

| mode | B7   | B6   | B5   | pixel range when SP = 3 |
|------|------|------|------|-------------------------|
| 1    | 0x00 | 0x00 | 0x00 | 0-31                    |
| 2    | 0x00 | 0xFF | 0x00 | 64-95                   |
| 3    | 0xFF | 0x00 | 0x00 | 128-159                 |
| 4    | 0xFF | 0xFF | 0x00 | 192-223                 |

For each mode, the start plane is the number of leading planes, from B7 down,
that hold the mode's values. The first mismatch stops the count, so SP is 0
to 3. The mode with the largest SP wins, and a tie goes to the lowest mode.
The decoder rebuilds the skipped planes from the mode alone.

A type 1-4 block always reaches SP >= 2 in the mode that matches its quarter.
So the coded planes start at B5, or at B4 if B5 is also 0x00.

### 3. Rounding

Only 3 or 4 planes below the start plane survive, and each pixel is rounded to
the nearest value those planes can express. The *significant bit* is the
first dropped bit. If it is 1 and the kept bits are not all 1, the kept bits
are incremented. Example with SP = 0 and 4 kept bits: `0101 1100` becomes
`0110 1100`.

How many bits are kept depends on the pattern comparison of step 4, which
itself looks at the rounded planes. The hardware resolves this by computing
both roundings of every pixel in parallel (`pix_rnd4`, `pix_rnd3`). The
comparison then uses whichever one fits the case it picks.

### 4. Pattern comparison (per 2x2 half)

Three groups of eight 4-bit patterns are predefined. They were collected from
the 2x2 shapes that occur most often:

| pattern no. | 1    | 2    | 3    | 4    | 5    | 6    | 7    | 8    |
|-------------|------|------|------|------|------|------|------|------|
| group A     | 0000 | 1111 | 1110 | 0111 | 0011 | 1100 | 0001 | 1000 |
| group B     | 0000 | 1111 | 1110 | 0111 | 1010 | 1001 | 0110 | 0101 |
| group C     | 0000 | 1111 | 1110 | 0111 | 1101 | 1011 | 0010 | 0100 |

Patterns 5-8 of the three groups together cover all 12 nibbles that are not
in the shared first four.

The comparison works on the four planes from SP down, taken from the 4-bit
rounding:

- The groups are tried in the order A, B, C. The first group that contains
  all four planes is chosen. Each plane is then stored as its 3-bit index
  (pattern number - 1), start plane first, which makes 12 bits. In this case
  four planes are kept exactly.
- If no group contains all four, the half is stored without comparison: the
  three planes from SP down, taken from the 3-bit rounding, as three raw
  nibbles (12 bits).

The packer concatenates mode, SP, both pattern fields and both data fields.

## How a segment is decompressed

The decompressor does all of its work in one combinational stage, followed by
the output register:

1. **Parser:** the segment is split into its fields.
2. **Pattern decoding**, once per half: each index is looked up in the
   group's table, giving four planes; a no-comparison half gives its three
   stored planes.
3. **Bit-plane decoding:** each pixel is rebuilt as
   - the mode's values for the SP skipped planes,
   - then the 4 or 3 decoded planes of the pixel's half,
   - then zeros for the dropped planes.

   The encoder has already rounded to the nearest value, so no offset is
   added back.

Decoding reproduces every stored plane exactly. The loss is confined to
truncation (step 1), to the rounding, and to the dropped low planes.

## Pipeline timing and interfaces

`pbcc_compressor` (`in_valid`, `in_pix` -> `out_valid`, `out_seg`):

- A block presented in cycle n is truncated during cycle n and registered in
  stage 1 at the end of that cycle.
- It is then selected, rounded, compared and packed during cycle n+1. The
  segment appears at the end of cycle n+1.
- One block can be presented every cycle, and there is no back-pressure.

`pbcc_decompressor` (`in_valid`, `in_seg` -> `out_valid`, `out_pix`): a
segment presented in cycle n is decoded in cycle n and registered at the end
of it.

Both modules use an active-low synchronous reset (`rst_n`). The reset clears
the valid bits and the data registers. Pixels travel as `pbcc_pkg::blk_t`, an
8 x 8-bit packed array in which `blk[i]` is pixel i.

## Frame memory layout and the top level

Because each block is one word, the address controller (`pbcc_addr_ctrl`)
places block (x, y) at `base + y * line_blocks + x`. Here x counts 4-pixel
columns, y counts 2-row block rows, and `line_blocks` is the frame width / 4.
A 1920x1088 frame occupies 261120 consecutive words.

`pbcc_ec_top` joins the pieces:

- **Write path:** `wr_valid`, `wr_blk_x`, `wr_blk_y` and `wr_pix` come from
  the deblocking filter. At the end of the next cycle, `mem_wr_en`,
  `mem_wr_addr` and `mem_wr_data` go to memory. The write address passes
  through a 2-stage copy of the address controller so that it stays in step
  with the compressor; an assertion checks this.
- **Read path:** `rd_req`, `rd_blk_x` and `rd_blk_y` come from motion
  compensation. They turn into `mem_rd_en` and `mem_rd_addr` in the same
  cycle (combinational).
- **Read return:** when the memory answers with `mem_rd_valid` and
  `mem_rd_data`, the block appears on `rd_valid` and `rd_pix` at the end of
  that cycle. The memory may answer any number of cycles later, but it must
  answer in request order.
- **Base addresses:** writes use `wr_base_addr` and reads use
  `rd_base_addr`. A decoder writes the current frame while it reads a
  reference frame.

The only parameter is `ADDR_W` (32).

The surrounding decoder is outside this RTL: the entropy decoder, inverse
quantisation and transform, intra prediction, motion compensation, the
deblocking filter, the bus arbiter and the memory itself. The top's ports are
where these parts would connect.

## Throughput against the target system

The intended platform decodes HD1080 plus HD720 at 30 frames/s with a 150 MHz
clock.

- **Writes:** (1920x1088 + 1280x720) / 8 x 30 = 11.3 M blocks/s. The
  compressor handles 150 M blocks/s.
- **Motion-compensation reads:** a 4x4 block needs 2 to 15 segment reads,
  depending on whether each motion-vector component is aligned, unaligned
  integer or fractional. Taking the worst case (15) for every 4x4 block gives
  84.7 M segments/s, against the decompressor's 150 M/s.

Without the codec the same fetches need 4 to 27 accesses. Halving the number
of memory accesses is the main benefit.

## Interpretations and own choices

The published description leaves several points open or is inconsistent.
This RTL resolves them as follows:

- **Start plane rule.** The published flowchart, and one sentence of the
  text, can be read as counting planes that are *not* 0x00. Planes counted
  that way could not be rebuilt by a decoder. The RTL follows the published
  list of mode values instead: SP counts the leading planes equal to the
  mode's fixed values. This also agrees with the truncation step, which makes
  exactly those planes constant.
- **When a group "hits".** The description mentions both four compared
  planes and "three successive bit planes". The RTL requires all four planes
  to be in the group. Four indices are what fill the 12-bit field, and with
  only three hits the fourth index would have no defined value.
- **Order of rounding and comparison.** Both roundings are computed and the
  comparison picks one, as described in step 3. The published pipeline draws
  rounding as a single step before the comparison.
- **Type 4 clamp.** The RTL clamps pixels below 192 to 192 (the mirror of
  type 1), as the published flowchart shows.
- **Own choices where the description is silent:**
  - the average is rounded down;
  - ties between modes go to the lowest mode;
  - the encodings of the mode and pattern fields;
  - the bit order within nibbles and coded data;
  - the decoder fills dropped planes with zeros;
  - the raster memory layout, the separate base addresses, the
    valid-only handshakes without back-pressure, and the reset.
- **Address width.** `ADDR_W` = 32 is an assumption. The 32 bits of the
  original system are its bus and memory word width.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/pbcc_ref_pkg.sv`, a reference model written arithmetically rather
than plane by plane:

- the start plane is the longest pixel prefix equal to the mode's prefix;
- rounding is `min((low + 2^(s-1)) >> s, 2^n - 1)`.

The same package generates the stimuli: uniform random, smooth, flat, and
blocks built from the pattern groups.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_pbcc_pixel_trunc`      | types and clamps, boundary blocks, all five types occur |
| `tb_pbcc_bitplane_sel`     | mode and SP, every mode and SP value occurs |
| `tb_pbcc_rounding`         | both roundings at every SP, the published example pixel, saturation |
| `tb_pbcc_pattern_cmp`      | case and coded data; cases A, B, C and none all occur |
| `tb_pbcc_pattern_dec`      | table lookup for every group, raw planes for no comparison |
| `tb_pbcc_bitplane_dec`     | pixel assembly for every mode, SP and plane count |
| `tb_pbcc_addr_ctrl`        | address formula, combinational and 2-stage |
| `tb_pbcc_compressor`       | segments against the reference; latency 2 cycles; 33 cycles per macroblock; all types, modes, SPs and cases occur |
| `tb_pbcc_decompressor`     | random and encoded segments; 1 cycle; 32 cycles per macroblock |
| `tb_pbcc_ec_top`           | end to end, default parameters (details below) |
| `tb_pbcc_mc_access`        | motion-compensation workload (details below) |

`tb_pbcc_ec_top` runs in two phases and needs about 2 seconds of simulation:

1. It writes a small frame, then writes a second one while reading the first
   back in random order through a memory that answers 1-4 cycles late.
2. It writes a complete 1920x1088 frame at one block per cycle and reads it
   back in full.

It counts each mechanism (truncation types, modes, start planes, pattern
cases, rounding and its saturation, overlapping reads and writes, late memory
answers) and fails if any of them never occurs.

`tb_pbcc_mc_access` writes a CIF (352x288) frame and an HD720 frame. For each
of the nine motion-vector cases it fetches the reference region of a 4x4
block. It checks that the number of segment reads matches the expected
counts (2, 2/3, 5, 4, 4/6, 10, 6, 6/9, 15), that blocks arrive at one per
cycle, and that their content is correct.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/pbcc_pkg.sv tb/pbcc_ref_pkg.sv tb/tb_pbcc_ec_top.sv \
  --top-module tb_pbcc_ec_top -Mdir obj -o sim
./obj/sim
```

`-y` lets Verilator find each module in the file of the same name.
Replace the testbench file and `--top-module` to run another one.

The tests check that the RTL matches this design's reading of the algorithm.
They do not measure picture quality. The published PSNR figures came from a
software decoder and are not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/pbcc_pkg.sv`          | types (`blk_t`, `seg_t`, `pat_e`, `trunc_type_e`), pattern table, mode plane values |
| `rtl/pbcc_pixel_trunc.sv`  | stage 1: average, difference, type, clamp |
| `rtl/pbcc_bitplane_sel.sv` | mode and start plane |
| `rtl/pbcc_rounding.sv`     | 4-bit and 3-bit rounding of all pixels |
| `rtl/pbcc_pattern_cmp.sv`  | group search and coded data for one half |
| `rtl/pbcc_compressor.sv`   | 2-stage compressor including the packer |
| `rtl/pbcc_pattern_dec.sv`  | index-to-plane lookup for one half |
| `rtl/pbcc_bitplane_dec.sv` | pixel reconstruction |
| `rtl/pbcc_decompressor.sv` | 1-stage decompressor including the parser |
| `rtl/pbcc_addr_ctrl.sv`    | block-to-word address, optional pipeline delay |
| `rtl/pbcc_ec_top.sv`       | codec top: write path and read path |
| `tb/pbcc_ref_pkg.sv`       | reference model and stimulus generator |
| `tb/tb_*.sv`               | testbenches |
