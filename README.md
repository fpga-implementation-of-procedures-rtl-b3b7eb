# Real-time no-reference video quality metrics in one streaming pass

This RTL measures four kinds of picture damage in every frame of a video
stream, without a reference copy of the video and at one 4x4 pixel group per
clock:

| metric     | what it catches                                   | produced here                                   |
|------------|---------------------------------------------------|-------------------------------------------------|
| blockiness | visible 8x8 block borders after coarse compression | IntraSum and InterSum (the host takes the ratio) |
| exposure   | frames that are too dark or too bright            | one byte: mean luminance of the extreme blocks  |
| blackout   | a frame of one flat colour (lost data, dead input) | one flag                                        |
| interlace  | misaligned half-frames ("combing")                | number of 4x4 microblocks showing the pattern   |

The key idea is that the host sends the frame in an order chosen for the
hardware. Every metric then works on one 128-bit word at a time, or on four
consecutive words. The channel needs no line buffers or frame memory. Its
storage is a few accumulators and two sorted lists of four entries.
Six identical channels run side by side, each on its own stream.

## Stream format

Each channel has one 128-bit input stream and one 128-bit output stream.
Both use a valid/ready handshake.

**Input, per frame**

1. One header word: frame width in bits 15:0, height in bits 31:16. All other
   bits are ignored. Width and height must be multiples of 8.
2. `width*height/16` microblock words.

A microblock is a 4x4 group of 8-bit grey-scale pixels. Its pixels are
numbered down each column: p1..p4 form the first column, top to bottom, and
p5..p8 the second. Pixel p(k) sits in bits `8k-1 : 8k-8` of the word. Four
consecutive microblocks make one 8x8 block, in this order:

```
 +----+----+
 | 1  | 2  |     microblock order inside a block
 +----+----+     (blocks themselves follow in raster order)
 | 3  | 4  |
 +----+----+
```

**Shifted blocks.** Blockiness compares pixels on both sides of a block
border. So that both sides arrive in the same block, the sender drops the
first row and the first column of the picture before cutting it into blocks.
Each block the hardware receives therefore reaches one pixel into its right
and lower neighbours. The real 8x8 border runs between columns 6 and 7 and
between rows 6 and 7, counting from 0. The hardware does not do this cropping
and does not check for it. It only assumes the data was prepared this way. The
other three metrics do not care about the shift.

**Output, per frame.** One result word (`vq_pkg::vq_result_t`):

| bits    | field                                   |
|---------|-----------------------------------------|
| 127     | blackout (1 = flat frame)               |
| 126:104 | unused, always 0                        |
| 103:96  | exposure                                |
| 95:64   | interlace count                         |
| 63:32   | InterSum                                |
| 31:0    | IntraSum                                |

To finish the metrics, the host computes:

- blockiness = IntraSum / InterSum;
- interlace = count / (width*height/16).

## The four metric units

### Blockiness (`vq_blockiness`)

Each block adds twelve absolute differences to IntraSum and twelve to
InterSum. An InterSum term straddles the block border. Its IntraSum partner
uses the pixel one step further inside the block. The term set below is the
one the design was specified with. It is not symmetric: block row 7 and
block column 7 contribute, and rows/columns 5 and 6 do not.

Coordinates are (row, col) inside the shifted block, 0..7:

- rows 0-4 and row 7: intra |(r,6)-(r,5)|, inter |(r,6)-(r,7)|.
- cols 0-4 and col 7: intra |(5,c)-(6,c)|, inter |(7,c)-(6,c)|.

Microblock 1 adds nothing. Microblock 2 adds the row terms of rows 0-3.
Microblock 3 adds the column terms of columns 0-3. Microblock 4 adds the rest.
The unit selects the pairs from `mb_idx` (the position of the microblock in
its block), adds four differences per sum, and accumulates once per clock.

### Exposure (`vq_block_sum` -> `vq_extreme_sort` -> `vq_exposure`)

1. `vq_block_sum` adds the 64 pixels of each block. Blocks are all the same
   size, so the sum is used in place of the mean.
2. `vq_extreme_sort` keeps the four smallest and the four largest block sums
   of the frame in two sorted register lists. A new sum enters the list in
   front of the first entry it beats (strictly). Later entries move down one
   place and the last one drops out.
   - At the start of a frame the "smallest" list holds 16384, which is above
     any block sum (the maximum is 64*255 = 16320).
   - The "largest" list starts at 0.
3. `vq_exposure` averages the 8 blocks x 64 pixels = 512 = 2^9 values by
   shifting. To stay within 16 bits it shifts each of the eight sums right by
   2, adds them, and shifts the total right by 7. The dropped fractions cost
   at most one step of the result byte.

### Blackout (`vq_blackout`)

Blackout reuses the two lists above and does not look at single pixels. The
frame is flat when the largest block sum exceeds the smallest by no more than
`TH_BLOUT` = 4. That takes one subtractor and one comparator. A spread of
exactly 4 still counts as blackout.

With a single-block frame the spread is zero, so such a frame always reads
as blackout. Exposure also needs at least four blocks before its lists hold
real data.

### Interlace (`vq_interlace`)

A microblock counts as interlaced when its rows alternate in every one of the
four columns, with all comparisons strict:

- pattern 1: row 1 > row 2 < row 3 > row 4;
- pattern 2: row 1 < row 2 > row 3 < row 4.

That is twelve comparisons ANDed per pattern, then ORed. A 32-bit counter
adds the hits.

## Channel timing (`vq_frame_ctrl`, `vq_fpga`)

`vq_frame_ctrl` sequences a frame through three states:

- **HDR** takes the header and computes `width*height/16`.
- **DATA** passes each microblock on, registered, with its position in the
  block.
- **DRAIN** waits `PIPE_DEPTH` = 3 cycles. In the third cycle it captures the
  result into the output register and pulses `clear`, which zeroes every
  metric register for the next frame.

The pipeline stages are:

```
cycle  0  last microblock accepted
       1  microblock register -> sums, interlace count, block sum updated
       2  block sum -> sorted lists updated
       3  exposure/blackout (combinational) captured with the sums; clear
          out_valid high from here
```

With an uninterrupted source, a frame of n microblocks keeps a channel busy
for n + 4 cycles. At 30 frames per second on one channel, that needs:

- 62.2 MHz for 7680x4320;
- 16.6 MHz for 4096x2160;
- 3.9 MHz for 1920x1080.

The header of the next frame can be taken while the previous result is
still waiting on the output. If that result has still not been taken when
the next frame ends, the capture waits (the channel stops at DRAIN), and
back-pressure then reaches the input FIFO. No result is lost.

## Top level (`vq_top`)

`NUM_VQ` channels (default 6). Each is built as:

```
in_*[c] -> vq_stream_fifo -> vq_fpga -> vq_stream_fifo -> out_*[c]
```

The channels share only clock and asynchronous active-low reset. The ports
are unpacked arrays indexed by channel.

- `busy[c]` is high while channel c is inside a frame.
- `mb_hit_interlace[c]` is high when the microblock channel c is processing
  is interlaced.

Inside a channel the streams are `vq_stream_if` interface instances. The
interface carries an assertion that a word on offer is neither withdrawn nor
changed before it is taken.

Parameters: `NUM_VQ` = 6 and `FIFO_DEPTH` = 16 on the top, `DEPTH` and `W` on
the FIFO. The rest are package constants in `vq_pkg`: stream width 128,
threshold 4, 16-bit block sums, 32-bit frame sums, `PIPE_DEPTH` 3.

## Departures and choices to be aware of

- **Blockiness terms.** The term set follows the hardware formulation of the
  metric. A textbook reading would take the six rows and columns next to the
  border of the unshifted block; this RTL does not.
- **Exposure over four plus four blocks**, not three plus three, so that the
  mean is a shift. The result is a byte scaled as a pixel value (0-255).
- **Blackout compares with "greater than 4"**. A definition with "at least
  4" would call a spread of exactly 4 "not blank".
- **Interlace patterns.** The two alternating patterns are this design's
  reading of the detection rule.
- **This design's own choices:**
  - header layout;
  - bit order of pixels in a word;
  - valid/ready handshake;
  - FIFO depth;
  - drain length;
  - waiting capture when the host is slow;
  - reset style.
- **Left to the host:** the two divisions, conversion to a mean opinion score
  (no thresholds are defined here), and the block-shift cropping of the
  picture.
- **Range.** The 32-bit sums are safe for any 8K frame (at most 1.59e9).
  Above about 90 Mpixel, a frame of extreme contrast could overflow them.
  For example, a 15360x8640 frame could reach 6.3e9.
- **Not covered:** the host link (PCI Express and the board's stream
  interface) and the host software that produces and consumes the streams.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/vq_tb_pkg.sv`, which:

- generates frames of any size from a pattern and a seed (random, flat,
  interlaced rows, blocky, dark, bright, mixed) without storing them;
- computes the expected result word straight from frame coordinates, with
  no microblocks involved.

| testbench             | covers                                                                 |
|-----------------------|------------------------------------------------------------------------|
| `tb_vq_blockiness`, `tb_vq_block_sum`, `tb_vq_extreme_sort`, `tb_vq_exposure`, `tb_vq_blackout`, `tb_vq_interlace`, `tb_vq_stream_fifo` | each unit against its own reference, including clear, ties and threshold edges |
| `tb_vq_frame_ctrl`    | microblock order and position, latency, clear, capture held by a slow consumer |
| `tb_vq_fpga`          | one channel, every pattern; rate of one microblock per clock; latency 3 |
| `tb_vq_top`           | six channels at once with random gaps and long output pauses; counts blackout, interlace, dark/bright frames, input and output back-pressure, held captures, all channels busy, and fails if any never occurred |
| `tb_vq_resolutions`   | 320x240, 640x480, 1920x1080, 4096x2160 and 7680x4320 frames back to back; checks n + 4 cycles per frame |
| `tb_vq_top_full`      | default top, a full 7680x4320 frame on all six channels (about 10 s) |

Running one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vq_pkg.sv tb/vq_tb_pkg.sv tb/tb_vq_top.sv --top-module tb_vq_top
./obj_dir/Vtb_vq_top
```

All of them pass. Each testbench was also run against a deliberately broken
copy of its module, and every one reported failures. Examples of the faults:
a dropped blockiness term, an exposure shift of 6 instead of 7, and a FIFO
read pointer that stalls on simultaneous read and write. The RTL lints
cleanly apart from style warnings:

- unused package constants in small modules;
- the unconnected FIFO `level` outputs in the top;
- the asynchronous reset also appearing in the interface assertion's
  `disable iff`.
