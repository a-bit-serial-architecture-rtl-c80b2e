# Bit-serial inter prediction for an H.264/AVC decoder

An H.264/AVC decoder rebuilds most pictures from pieces of earlier pictures.
Each 4x4 block of a macroblock carries a motion vector with quarter-sample
precision for luma and eighth-sample precision for chroma. The predicted block
is made by interpolating the reference picture at that fractional position:

- luma uses a 6-tap filter `(1, -5, 20, 20, -5, 1)` for half-sample positions,
  and averages two neighbours for quarter-sample positions;
- chroma uses a bilinear blend of the four nearest integer samples.

Two things make this costly. First, every 4x4 luma block needs a 9x9 window of
reference samples, so up to 81 samples come from external memory for 16 output
samples. Second, the filter does many multiply-adds per output sample.

This design answers both problems:

- **A small local cache with pre-fetch.** The cache holds 24x24 reference
  samples (6x6 blocks of 4x4). It is filled from external memory in whole
  blocks, using four reading modes, so that neighbouring blocks of one
  partition share the data already fetched.
- **Bit-serial filters.** All filters work on one bit per clock, least
  significant bit first. A 6-tap filter then shrinks to four one-bit adders
  and four flip-flops. It is small enough that 88 of them are instantiated
  side by side, and a whole 4x4 luma block is interpolated in a single serial
  pass of 28 clocks.

Around the inter prediction module sits a reconstruction block with the
decoder's command and coefficient queues. It selects inter or intra prediction
and adds the prediction error.

```
 partition requests ─► command FIFO ─► fetch planner ─► inter prediction ─► prediction FIFO ─┐
                                                           ▲   │                              │
                                          external memory ─┘   └─ (credit gate)               ▼
 coefficients ─► coefficient FIFO ─► [inverse transform, outside] ─► prediction error ─►  + ─► clip ─► samples
 [intra prediction, outside] ──────────────────────────────────────► MUX (inter/intra) ──┘
```

Inside the inter prediction module:

```
 commands ─► controller ──┬─► pre-fetch unit ─► reference cache (24x24) ─► sample buffer (9x9) ─► luma filter matrix ──┐
                          │        ▲                     │                                                            ├─► predicted samples
                          │   external memory            └──────────────► sample buffer (3x3) ─► chroma filter ───────┘
                          └─► chroma weight unit ─────────────────────────────────────────────────────────┘
```

The rest of this document goes from the smallest part to the whole. Bit-serial
arithmetic comes first, because everything else rests on it.

## Bit-serial arithmetic in this design

Each number travels on one wire, least significant bit first, one bit per
clock. A `first` strobe marks bit 0. Three facts carry the whole design:

1. **Addition is one full adder and a carry flip-flop.** At bit 0 the carry
   starts from its preset value; after that it is the carry of the previous
   bit. `serial_adder` generalises this to any number of positive and
   negative operands. Its carry register is wide enough to hold the carry of
   the full sum of all operands.
2. **Subtraction inverts the bit and adds one.** A negative operand enters the
   adder inverted. The carry is preset at bit 0 to the number of negative
   operands, which supplies the `+1` of each two's complement.
3. **A one-clock delay doubles a number.** Delaying an LSB-first stream by one
   clock moves every bit one place up. Two delays multiply by 4. The delay
   flip-flops must hold zero when a new word starts, so they are cleared at
   bit 0.

A stream carries as many bits as the clock count allows. Inputs are unsigned
8-bit samples. After bit 7 their shift registers give zeros, which is the
correct extension. Inside the filters every number is two's complement. Once
all real input bits have passed, the output keeps producing its sign bit. That
is why a result can be read over more clocks than the inputs have bits.

## The serial 6-tap filter (`luma_serial_filter`)

The H.264 half-sample filter on six neighbours `a..f` is

```
y = a - 5b + 20c + 20d - 5e + f
```

It is rewritten so that only doubling and adding are needed:

```
s1 = c + d
s2 = 4*s1 - (b + e)        = 4c + 4d - b - e
s3 = 4*s2 + s2 = 5*s2      = 20c + 20d - 5b - 5e
y  = s3 + a + f
```

This needs four serial adder sections and four delays:

| section | serial adder                 | delays after it                          |
|---------|------------------------------|------------------------------------------|
| 1       | `s1 = c + d`                 | two (gives `4*s1`)                       |
| 2       | `s2 = 4*s1 - b - e`          | two (gives `4*s2`)                       |
| 3       | `s3 = 4*s2 + s2`             | none                                     |
| 4       | `y = s3 + a + f`             | output register (one clock of latency)   |

At bit 0 and bit 1 the doubled copies must be zero, not the tail of the
previous word. The delay registers are therefore cleared when `first` is seen.
Sections 2 and 4 take three operands at once, so a carry of 2 can pass to
the next bit; their carry registers are wider than one bit. The output bit is registered. Because of that register, a
filter's output can drive a second filter without a long combinational path.
As a result, the second filter's bit 0 comes one clock after the first
filter's.

Result widths:

- **First-stage filters on 8-bit samples.** Results range from -2550 to 10710,
  so 15 bits are enough. The matrix collects 16.
- **Second-stage filters.** These take first-stage results as input. Their
  results need 20 bits.

## The luma filter matrix (`luma_filter_matrix`)

The matrix interpolates one 4x4 block per pass. Its input is the 9x9 window
around the block, with rows and columns numbered 0..8. The block's integer
samples sit at rows and columns 2..5. This leaves two samples of margin above
and to the left, and three below and to the right. That is what a 6-tap filter
needs for half-sample positions up to the block's right and bottom edges.

Three groups of serial filters work at the same time:

| group        | count | inputs                                         | gives                                    |
|--------------|-------|------------------------------------------------|------------------------------------------|
| horizontal   | 36    | 4 per window row, 6 adjacent samples of a row  | unrounded horizontal half samples, all 9 rows |
| vertical     | 36    | 4 per window column, 6 samples of a column     | unrounded vertical half samples, all 9 columns |
| centre       | 16    | serial outputs of 6 horizontal filters in a column | unrounded centre half samples `j`     |

All 81 window samples are loaded in parallel into shift registers and shifted
out together, one bit per clock. The horizontal and vertical filters see their
bit 0 at serial clock 0. Their registered outputs start at clock 1, and the
centre filters start there, with their own `first` strobe at clock 1. The
centre value is therefore computed from exact intermediate values, with
nothing rounded in between, as the standard requires.

The serial outputs are gathered back into parallel words:

- first-stage results: 16 bits, over clocks 1..16;
- centre results: 20 bits, over clocks 2..21.

So at least 22 serial clocks are needed. The default `SER_CYCLES` is 28, so
that a block's filtering and output take 44 clocks in all (28 serial clocks
plus 16 output clocks).

### Output stage: choosing among 16 positions

After the serial pass the output stage sends 16 samples, one per clock, in
raster order. The fractional position `(fx, fy)` is given in quarter samples,
each 0..3, and picks the formula. For an output at integer position G:

- `b` is the horizontal half sample to the right of G;
- `s` is the same half sample one row lower;
- `h` is the vertical half sample below G;
- `m` is the same half sample one column to the right;
- `j` is the centre half sample.

Half samples are rounded as `(x + 16) >> 5` and `j` as `(x + 512) >> 10`.
Both are clipped to 0..255. Quarter samples are `(p + q + 1) >> 1` of the two
listed values:

| fy \ fx | 0             | 1           | 2           | 3                 |
|---------|---------------|-------------|-------------|-------------------|
| 0       | G             | avg(G, b)   | b           | avg(b, G right)   |
| 1       | avg(G, h)     | avg(b, h)   | avg(b, j)   | avg(b, m)         |
| 2       | h             | avg(h, j)   | j           | avg(j, m)         |
| 3       | avg(h, G below) | avg(h, s) | avg(j, s)   | avg(m, s)         |

A 5x5 copy of the integer samples near the block is kept for the G terms.

The matrix is the biggest part of the design: 88 serial filters plus the
collection registers. The reference architecture this design follows shares
filter sections between horizontal and vertical filters, which roughly halves
the first-stage area. This design builds all 72 first-stage filters in full.
The results are identical; only the area differs.

## Chroma interpolation

A chroma sample at eighth-sample offset `(fx, fy)` between integer samples
A (top left), B (top right), C (bottom left) and D (bottom right) is

```
((8-fx)(8-fy)·A + fx(8-fy)·B + (8-fx)fy·C + fx·fy·D + 32) >> 6
```

### Weight unit (`chroma_weight_unit`)

The four weights stay the same for a whole chroma block. They are computed
ahead of time by one small multiplier, used on four clocks in a row:

- clock 1 gives `Fa = (8-fx)(8-fy)`;
- clock 2 gives `Fb = fx(8-fy)`;
- clock 3 gives `Fc = (8-fx)fy`;
- clock 4 gives `Fd = fx·fy`.

The controller starts this unit when it accepts a chroma command. So the
weights are ready long before the nine reference samples have been read from
the cache.

### Serial filter (`chroma_filter`)

The filter produces a 2x2 block of chroma samples from a 3x3 window. For each
output sample there are four serial-parallel multipliers, one per weight. Each
multiplier works like this:

- the incoming sample bit gates the 7-bit weight with an AND;
- the gated weight is added into a 6-bit accumulator;
- the low bit of the sum leaves as the next product bit;
- the rest of the sum is kept, shifted right by one.

The sample supplies 8 bits. After that, zeros flush the accumulator, so a
product is complete after 16 clocks. A 4-input serial adder (the output
accumulator) adds the four product streams bit by bit. It shifts the sum into
a result register. After the serial pass the output is rounded with `+32 >> 6`.
The four output samples are computed at the same time and then leave one per
clock. A chroma block takes 16 serial clocks plus 4 output clocks.

## Reference cache, memory layout and reading modes

### External memory

The reference picture is stored block by block:

- each 4x4 block is four consecutive 32-bit words, one word per row;
- sample `x` of a row sits in bits `[8x+7:8x]`;
- blocks follow in raster order;
- the Cb and Cr planes follow the Y plane.

With the default 720x576 picture, the word address of row `r` of block
`(bx, by)` is:

| plane | base            | blocks per row | address                          |
|-------|-----------------|----------------|----------------------------------|
| Y     | 0               | 180            | `(by*180 + bx)*4 + r`            |
| Cb    | 103680          | 90             | `103680 + (by*90 + bx)*4 + r`    |
| Cr    | 129600          | 90             | `129600 + (by*90 + bx)*4 + r`    |

That is 155520 words, held by an 18-bit address. This layout means that any
whole block is four accesses in a row, with no address jumps inside it.

### Memory port

The memory port is a simple request/grant interface with in-order read data:

- `mem_req` and `mem_addr` issue a request;
- `mem_gnt` accepts it;
- `mem_rvalid` and `mem_rdata` return the data, with any latency.

The pre-fetch unit issues one request per clock while requests are granted.
It writes each returned word into the cache.

### Cache (`ref_cache`)

The cache holds 24x24 samples: 6x6 blocks, stored as 144 words of 32 bits.

- **Write port:** one word per clock, from the pre-fetch unit.
- **Read port:** one 8-bit sample per clock, with one clock of latency.

The two ports are independent, so a fill can run while a window is being
read. The cache is used as a torus:

- block positions wrap modulo 6;
- sample coordinates wrap modulo 24.

Because of the wrap, a window may straddle the cache's edge.

### Reading modes (`prefetch_unit`)

One fetch command copies a group of blocks from the picture into the cache:

| mode | blocks                     | words | typical use                                  |
|------|----------------------------|-------|----------------------------------------------|
| M0   | 3x3 (a block and its ring) | 36    | first block of a partition                   |
| M1   | a row of 3                 | 12    | extending the cached area down by one block row |
| M2   | a column of 3              | 12    | extending it right by one block column       |
| M3   | one block                  | 4     | the corner left over                         |

A fetch names the mode, the plane, the picture block `(bx, by)` of its top
left, and the cache block `(cx, cy)` where that block goes. The unit reports
`ready` only when all requested words have returned.

## Planning the fetches for a partition (`fetch_planner`)

A luma partition is `w x h` blocks of 4x4 (with w, h ∈ {1, 2, 4}). Its
reference area starts at integer sample `(X, Y)`, the integer part of the
motion vector added to the partition's position. The partition needs the
reference blocks starting at `floor((X-2)/4)`, over `w+2` block columns and
`h+2` block rows. The planner cuts each side into segments:

- a side of 3 blocks is one segment;
- a side of 4 blocks is 3 + 1;
- a side of 6 blocks is 3 + 3.

A 3x3 tile is fetched with M0, 3x1 with M1, 1x3 with M2 and 1x1 with M3.

The planner then walks the partition's 4x4 blocks in raster order. Before each
block it emits fetches for the tiles that block's 9x9 window touches and that
are not in the cache yet. Then it emits the luma command. Fetches for later
blocks thus queue behind earlier filter work and overlap it. For an 8x8
partition the stages come out as:

1. M0 for the first block;
2. M2 for the second block;
3. M1 for the third block;
4. M3 for the fourth block.

The number of words fetched per macroblock depends only on the partition
shape:

| partition    | partitions | blocks fetched each | 32-bit words per macroblock |
|--------------|------------|---------------------|-----------------------------|
| 16x16        | 1          | 6x6                 | 144                         |
| 16x8 / 8x16  | 2          | 6x4                 | 192                         |
| 8x8          | 4          | 4x4                 | 256                         |
| 8x4 / 4x8    | 8          | 4x3                 | 384                         |
| 4x4          | 16         | 3x3                 | 576                         |

The planner places a partition's region in the cache at block
`(3·(px4 mod 2), 3·(py4 mod 2))`, where `px4, py4` is the partition's
position in 4-sample units. Two small neighbouring partitions therefore use
different quarters of the cache. The luma command for a block carries:

- the cache sample position of its 9x9 window, `x0 = (4·cx0 + (X-2) mod 4 + 4·i) mod 24`, and the same for `y0`;
- the quarter-sample fraction, taken from the low two bits of the motion vector.

## Controller and the overlap of fill, load and filter (`inter_pred_ctrl`)

Commands are executed in order, but three kinds of work overlap:

- **Fetch.** A FETCH command starts the pre-fetch unit when it is idle.
- **Window read.** A LUMA or CHROMA command first waits until every earlier
  fetch has landed. It then reads its 9x9 (or 3x3) window from the cache into
  the sample buffer, one sample per clock, in raster order.
- **Filtering.** When the whole window is in the buffer and both filters are
  idle, the matching filter starts. It copies the buffer into its own shift
  registers, so the buffer is free again at once.

A fetch may run while a window is being read, as long as it writes none of the
cache blocks that the window covers. The controller checks this with 6-bit
column and row masks over the 6x6 block grid. The masks wrap, like the cache.
A fetch that would overwrite a block being read waits until the read has
finished.

Two rules keep the outputs right:

1. **One filter at a time.** A filter starts only when both filters are idle.
   The output stream is therefore in command order, and luma and chroma
   samples never collide.
2. **No window read during a fetch.** A window read never starts while a
   fetch is in progress. Every block the window needs has therefore arrived.

## Commands and interfaces

### Inter prediction module (`inter_pred`)

The module takes `inter_cmd_t` commands, defined in `avc_inter_pkg`:

| op       | fields used                                                   |
|----------|---------------------------------------------------------------|
| `CMD_FETCH`  | `mode` (M0..M3), `plane`, picture block `bx, by`, cache block `cx, cy` |
| `CMD_LUMA`   | window top left in the cache `x0, y0` (0..23), fraction `fx, fy` (0..3) |
| `CMD_CHROMA` | window top left `x0, y0`, fraction `fx, fy` (0..7)        |

Commands use a valid/ready handshake.

Predicted samples leave on `out_valid` and `out_sample`, one per clock:

- 16 samples per luma command, in raster order;
- 4 samples per chroma command.

`out_last` marks a block's last sample and `out_chroma` marks chroma samples.
The output cannot be stalled. Whoever drives the module must have room for
what it asked for.

### Reconstruction block (`avc_recon_top`)

The top takes `pred_req_t` entries into a 16-deep command FIFO. There are two
kinds:

- **`REQ_PART`** predicts a luma partition. Fields: macroblock `mb_x, mb_y`;
  partition position `px4, py4` and size `w4, h4` in 4-sample units; motion
  vector `mvx, mvy` in quarter samples. The planner expands it.
- **`REQ_RAW`** carries one `inter_cmd_t` unchanged. Chroma work and any
  hand-made command sequence use this kind.

Predicted samples go into a 64-deep prediction FIFO. The module's output
cannot be stalled, so the top keeps a credit count: the number of samples
promised to that FIFO but not yet read. A filter command is passed on only
while `credits + 16 <= PRED_DEPTH`.

The output stage (`recon_adder`) works as follows:

- it takes a sample from the prediction FIFO, or from the intra port when
  `sel_intra` is high;
- it adds the signed 10-bit prediction error from `res`;
- it clips the sum to 0..255;
- it returns the result on `rec_*`.

The coefficient FIFO (64 x 16 bits) sits between `coef_in_*` and
`coef_out_*`, and feeds an external inverse transform.

Every stream port uses valid/ready. Reset is active low and asynchronous
(`rst_n`).

## Timing

Measured in simulation. The memory model returns data four clocks after the
grant, and withholds the grant on 20 % of clocks at random (10 % in the
end-to-end test). The isolated-block time does not depend on the memory,
because its cache is filled before the command.

| operation                                           | clocks |
|-----------------------------------------------------|--------|
| luma filter matrix, start to last sample            | 44 (28 serial + 16 out) |
| chroma filter, start to last sample                 | 20 (16 serial + 4 out) |
| chroma weights ready after start                    | 4      |
| M0 fetch, no stalls                                 | 36 issue clocks + memory latency |
| isolated luma block, command to last sample (cache already filled) | 128 |
| one 16x16 macroblock, request to last luma sample   | 1438   |

The isolated block takes 128 clocks:

| step                   | clocks |
|------------------------|--------|
| command accept         | 1      |
| cache reads            | 81     |
| read latency           | 1      |
| hand-over to the filter | 1     |
| filtering and output   | 44     |

In a macroblock, reading the next window overlaps filtering of the current
block, and fills overlap both. Each window still reads one sample per clock
from a single-port buffer path. The macroblock time is therefore bounded below
by 16 x 81 = 1296 clocks of cache reads.

A 720x576 picture has 1620 macroblocks. At 25 frames per second and
1438 clocks per macroblock, luma prediction alone needs about 58 MHz.

## How this design relates to the architecture it follows

The following parts come from the reference architecture:

- the reconstruction block's structure: command and coefficient FIFOs, inter
  and intra prediction, the MUX and adder;
- the 24x24 block cache with pre-fetch, the block-ordered 32-bit memory
  layout and the four reading modes;
- the two-phase processing of each 4x4 block: load the window into a buffer,
  then filter;
- the bit-serial 6-tap filter with four adder sections and four delays;
- the 9x9 matrix of 36 horizontal and 36 vertical filters, plus 16 filters
  for the centre positions;
- the chroma filter built from four serial-parallel multipliers and a serial
  output accumulator, with weights computed ahead of time by one shared
  multiplier.

The following are this design's own choices:

- all handshakes, the command format and the partition request format;
- the planner's tile order and cache placement;
- the credit gate and the prediction FIFO;
- the output register in each serial filter;
- the serial length of 28 clocks;
- the 2x2 chroma output block for each 3x3 window;
- rounding in the chroma filter after the serial pass.

Departures and omissions:

- **No filter sharing.** All 72 first-stage filters are built in full. The
  reference shares sections between horizontal and vertical filters for about
  half the area.
- **Block time.** An isolated block takes 128 clocks, against 125 in the
  reference. A 16x16 macroblock takes 1438 clocks, against 1357 in the
  reference.
- **No dual-port variant.** The faster variant that reads two samples per
  clock (about 754 clocks per macroblock) is not built.
- **One direction only.** There is no averaging of two predictions
  (bi-directional prediction) and no weighted prediction.
- **No picture-edge extension.** Motion vectors must keep the reference area
  inside the picture.
- **Chroma is not planned.** The planner handles luma partitions only. Chroma
  fetches and filter commands are sent as raw commands.
- **Outside parts are ports.** Intra prediction, the inverse transform, the
  context buffer used by intra prediction, and the external memory are not
  part of this RTL. Their streams are brought out as ports. The memory has a
  behavioural model in the testbench directory.

## Source files

| file | contents |
|------|----------|
| `rtl/avc_inter_pkg.sv`     | shared constants, command and request types |
| `rtl/serial_adder.sv`      | multi-operand bit-serial adder |
| `rtl/luma_serial_filter.sv` | one bit-serial 6-tap filter |
| `rtl/luma_filter_matrix.sv` | 88-filter matrix and quarter-sample output stage |
| `rtl/sample_buffer.sv`     | window buffer (81 or 9 samples) |
| `rtl/ref_cache.sv`         | 24x24 two-port reference cache |
| `rtl/prefetch_unit.sv`     | reading modes M0..M3 over the memory port |
| `rtl/chroma_weight_unit.sv` | bilinear weights with one multiplier |
| `rtl/chroma_filter.sv`     | serial-parallel chroma filter |
| `rtl/inter_pred_ctrl.sv`   | command dispatch and overlap control |
| `rtl/inter_pred.sv`        | inter prediction module |
| `rtl/fetch_planner.sv`     | partition → fetch and filter commands |
| `rtl/sync_fifo.sv`         | FIFO queue |
| `rtl/recon_adder.sv`       | inter/intra MUX, residual adder, clip |
| `rtl/avc_recon_top.sv`     | reconstruction block (top) |
| `tb/luma_ref_pkg.sv`       | reference luma interpolation, written directly from the formulas |
| `tb/frame_ref_pkg.sv`      | test picture (hashed samples, with runs of 0 and 255) and its memory image |
| `tb/frame_ram_model.sv`    | external memory model with latency and random grant stalls |
| `tb/tb_*.sv`               | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a testbench that hangs and counts that as a failure. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb \
  rtl/avc_inter_pkg.sv tb/luma_ref_pkg.sv tb/frame_ref_pkg.sv \
  rtl/serial_adder.sv rtl/luma_serial_filter.sv rtl/luma_filter_matrix.sv \
  rtl/sample_buffer.sv rtl/ref_cache.sv rtl/prefetch_unit.sv \
  rtl/chroma_weight_unit.sv rtl/chroma_filter.sv rtl/inter_pred_ctrl.sv \
  rtl/inter_pred.sv rtl/fetch_planner.sv rtl/sync_fifo.sv rtl/recon_adder.sv \
  rtl/avc_recon_top.sv tb/frame_ram_model.sv tb/tb_avc_recon_top.sv \
  --top-module tb_avc_recon_top
./obj_dir/Vtb_avc_recon_top
```

For a single module, list the package, the module and what it instantiates,
then its testbench. For example:

```
verilator --binary --timing rtl/serial_adder.sv rtl/luma_serial_filter.sv \
  tb/tb_luma_serial_filter.sv --top-module tb_luma_serial_filter
```

## What the tests check

- **Serial filter.** `tb_luma_serial_filter` checks random and extreme inputs
  against the 6-tap formula, with words sent back to back so that no state
  leaks from one word to the next. Chained second-stage filters are checked
  through the matrix test.
- **Luma matrix.** `tb_luma_filter_matrix` checks all 16 fractional positions
  against the reference package. Windows include all-0 and all-255 ones, so
  the clipping limits are reached. It also checks the 44-clock latency.
- **Chroma.** `tb_chroma_weight_unit` checks all 64 fractions.
  `tb_chroma_filter` checks random windows and fractions against the bilinear
  formula, and the 20-clock latency.
- **Cache and pre-fetch.** `tb_ref_cache` checks reads at wrapped
  coordinates while writes continue on the other port. `tb_prefetch_unit`
  checks every cache write for every mode, plane and wrapped cache position,
  and the word count under memory stalls and latency.
- **Controller.** `tb_inter_pred_ctrl` checks the read order and buffer
  indices. It also checks the start rules, that no read touches a block under
  fetch, and that fetches do overlap reads and filtering.
- **Planner.** `tb_fetch_planner` checks every partition shape and position
  with random motion vectors. A model of the cache checks that every 9x9
  window holds exactly the samples the motion vector points to. It also
  checks the words-per-macroblock counts in the table above and the mode
  order for an 8x8 partition.
- **Inter prediction module.** `tb_inter_pred` runs the whole module against a
  memory model and compares every predicted sample. It also checks the
  128-clock isolated-block time.
- **Whole reconstruction block.** `tb_avc_recon_top` runs at the default
  720x576 size. It sends whole macroblocks of every partition shape, chroma
  blocks, intra samples and residuals, with random output stalls. It checks
  every reconstructed sample. It also requires that each mechanism happened at
  least once: every reading mode, credit stalls, memory stalls, clipping at
  both ends, intra selection and a full coefficient FIFO.

Every testbench has also been run against a copy of its module with one
deliberate bug, and each reported failures.
