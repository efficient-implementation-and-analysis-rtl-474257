# Multiplier-based 2-D Haar DWT image coder with radix-4 Booth MAC units

This is a small still-image coder in the style of the JPEG 2000 front end.
A 512 x 512 RGB image arrives as a pixel stream, and each pixel is turned into
an 8-bit grey level. The frame is stored, then decomposed by a three-level
two-dimensional discrete wavelet transform (DWT) into the usual LL, HL, LH
and HH subbands. The coefficients then leave as a serial bit stream. A second
stage listens to that stream and produces quantised, thresholded,
zero-run-length tokens.

All filtering is done by multiply-accumulate (MAC) units. They are built
around a radix-4 (modified) Booth multiplier, so the arithmetic core is:

    Booth encoder -> carry-save tree (partial products + accumulator)
                  -> compensation row -> parallel-prefix adder

The wavelet is the unnormalised Haar pair: low = (a + b) / 2, high = a - b.
It is applied level by level: first to every row of the current low-low
square, then to every column, with the intermediate results kept in the frame
memory.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). Every
block has a self-checking testbench.

## Data path

```
rgb[23:0] -> rgb2gray -> dwt_2d ------------------------> output_writer -> bit stream
                          |  frame_mem (N*N x 16 bit)        |
                          |  line buffer (N x 16 bit)        +--> stage2_encoder -> tokens
                          |  mac_unit (low pass)                   quantizer
                          |  mac_unit (high pass)                  zero_threshold
                          |    booth_multiplier                    rle_zero
                          |      booth_encoder, csa_tree,
                          |      comp_ckt, prefix_adder
```

`dwt_top` wires these blocks together. The blocks are:

| module | what it does |
|---|---|
| `dwt_pkg` | shared widths, Haar taps, Booth digit and subband enums |
| `rgb2gray` | grey = floor((R+G+B)/3); the division is a multiply by 683 and a shift right by 11 (exact for sums up to 765); 1 clock |
| `frame_mem` | single-port RAM, N*N words of 16 bits, 1-clock read |
| `dwt_2d` | loads the frame and runs the level-by-level transform in place; holds the frame memory, the line buffer and two MACs |
| `mac_unit` | 32-bit accumulator; a "MUL" write loads x*y and a "MAC" write adds x*y |
| `booth_multiplier` | 17 x 17 signed multiplier with a merged 34-bit addend |
| `booth_encoder` | radix-4 recoding; 9 partial-product rows for 17-bit operands |
| `csa_tree` | Wallace-style 3:2 reduction to a sum and a carry vector |
| `comp_ckt` | adds the +1 bits of the negated rows into the carry-save pair |
| `prefix_adder` | Kogge-Stone carry-propagate adder |
| `output_writer` | reads the subbands in order and shifts each word out MSB first |
| `stage2_encoder` | serial receiver followed by the three Stage-2 steps |
| `quantizer`, `zero_threshold`, `rle_zero` | the Stage-2 steps |

## The arithmetic core

**Booth recoding (`booth_encoder`).** One zero is appended below the LSB of
the multiplier, and the multiplier is sign extended by one bit. It is then cut
into overlapping 3-bit groups, starting at the LSB. Each group picks one
operation from the radix-4 table:

| group | operation |
|---|---|
| 000, 111 | add 0 |
| 001, 010 | add X |
| 011 | add 2X |
| 100 | subtract 2X |
| 101, 110 | subtract X |

The 17-bit operands therefore give 9 rows instead of 17.

A subtracted row is produced as the one's complement of the multiple. The
missing +1 of that row leaves on `neg[i]`, with weight 2^(2i). Each row is
sign extended to 34 bits and shifted by 2i.

Worked example: for 17 x (-9) at 6 bits, the digits are -1, +2, -1 (LSB
first), and the rows add up to -153. This case is part of the tests.

**Carry-save stage (`csa_tree`, `comp_ckt`).** The tree takes ten rows: the
nine Booth rows plus the addend. The addend is the accumulator during a MAC
step and zero otherwise. The tree reduces the ten rows to two in five levels
of full adders. `comp_ckt` then gathers the `neg` bits into one correction
word and folds it in with one more 3:2 row. The final adder therefore still
sees only two operands.

**Final adder (`prefix_adder`).** This is a Kogge-Stone tree. It needs six
prefix levels for 34 bits.

**MAC (`mac_unit`).** The accumulator is updated only on a write:

- `acc_mode = 0` loads `x*y`.
- `acc_mode = 1` adds `x*y` to the accumulator.

The result shows on `acc` one clock after the write. Because the accumulator
joins the carry-save tree, a multiply and a multiply-accumulate cost the same
single carry-propagate addition. The 34-bit result is wrapped to 32 bits.

## The level-by-level transform (`dwt_2d`)

This is the part that takes the most care.

**Fixed-point format.** Coefficients are signed 16-bit words with
`FRAC = 2*LEVELS = 6` fractional bits, so a pixel p is stored as p*64. Each
averaging step uses up one fractional bit, and there are two averaging steps
per level. Every low-pass result is therefore exact, and nothing is ever
rounded.

The magnitudes fit in 16 bits:

| subband | bound |
|---|---|
| LL | 255 |
| HL, LH | 255 |
| HH | 510 |

The largest, 510*64 = 32640, is below 2^15.

**Filter taps.** The taps are in Q1: the low pass uses (1, 1) and the high
pass uses (2, -2). The MAC result is shifted right by one bit. Each pair
(a, b) costs two MAC steps, and the low-pass and high-pass MACs run side by
side:

1. `MUL` with a.
2. `MAC` with b.

**Schedule.** The current low-low square has side S (512, then 256, then
128). For each line (row or column) of that square:

1. Copy the S words of the line into the line buffer: S clocks.
2. For each of the S/2 pairs, run MUL, MAC, write L to position n, and write
   H to position S/2 + n: 4 clocks per pair.
3. Advance to the next line: 1 clock.

A line therefore takes 3S + 1 clocks, and a level takes 2*S*(3S + 1) clocks.
At 512 x 512 and three levels, that totals 2,066,176 clocks.

**Memory layout.** The writes go back into the same line. After a level, the
square holds the Mallat layout:

| position | subband |
|---|---|
| top left | LL |
| top right | HL (horizontally high) |
| bottom left | LH |
| bottom right | HH |

The next level works on the LL corner only.

**Loading and release.** The frame is loaded as a raster stream of exactly
N*N pixels. The transform starts by itself after the last pixel. When `done`
rises, the memory can be read through the `rd_*` port, which has a 1-clock
latency. A `release_frame` pulse sends the engine back to loading.

## Output stream and Stage-2 tokens

**Output stream (`output_writer`).** While `en` is high and the transform is
done, the writer sends the subbands in this order, each in raster order:

    LL3 HL3 LH3 HH3 HL2 LH2 HH2 HL1 LH1 HH1

Each 16-bit word goes out MSB first, one bit per clock, and takes 18 clocks
(read, latency, 16 bits). The stream signals are:

- `word_start` marks the first bit of each word.
- `subband` and `band_level` tag the word; level 0 is the finest.
- `last` marks the last bit of the frame.

Pulling `en` low pauses the stream. After the last bit, the writer releases
the frame memory for the next frame. A full frame takes 18 * 262144 clocks.

**Stage 2 (`stage2_encoder`).** It rebuilds each word from the stream and
passes it through three steps, one clock each:

1. **Quantiser.** The step is a power of two that depends on the
   configuration `mode` (0, 1 or 2), the subband and the level:
   `q = sign(c) * (|c| >> (6 + shift))`. The shift is 0 for LL and in
   mode 0; otherwise it is `mode * (1 + [level 0] + [HH])`.
2. **Zero threshold.** Values whose magnitude is below the threshold become
   zero. The threshold is 0 for LL and in mode 0, `mode` for HL and LH, and
   `2*mode` for HH.
3. **Zero run-length coder.** It emits a token (run, value) for every
   non-zero value, where run counts the zeros before it. A token without a
   value is emitted when a run reaches 65535 or the frame ends. The final
   token of a frame has `tok_eob` set.

This gives three encoder configurations:

- mode 0 keeps everything apart from rounding to integers;
- modes 1 and 2 compress more and more.

## Interface of `dwt_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `rgb_valid`, `rgb[23:0]` | in | {R,G,B} pixel, raster order; send exactly N*N per frame |
| `rgb_ready` | out | high while a frame is being loaded |
| `en` | in | output enable |
| `busy`, `done`, `row_pass`, `level` | out | transform status |
| `bit_out`, `bit_valid`, `word_start`, `last`, `subband`, `band_level` | out | coefficient stream |
| `mode[1:0]` | in | Stage-2 configuration; hold it for a frame |
| `tok_valid`, `tok_run`, `tok_value`, `tok_has_value`, `tok_eob` | out | Stage-2 tokens |
| `cut_pulse` | out | a coefficient was thresholded to zero |

The parameters are `N = 512` (image side, a power of two) and `LEVELS = 3`.

## What follows the source design and what is this design's own

**Taken from the source description:**

- the processing chain: RGB to grey by channel average, then 2-D DWT, then
  output writer with an enable and a bit-stream output;
- the 512 x 512 8-bit image, three decomposition levels and 16-bit
  coefficients;
- the Haar averages and differences;
- the row-then-column, level-by-level organisation with intermediate results
  in memory;
- the 17-bit operands of the Booth multiplier, the radix-4 table, and the
  encoder / CSA tree / compensation / parallel-prefix structure;
- the 32-bit MAC accumulator updated on operand writes, with accumulation in
  the carry-save stage ahead of the final addition;
- a Stage 2 made of per-subband quantisation, per-subband zero thresholding
  and run-length coding of zeros, with three encoder configurations.

**Chosen here,** because the source does not specify them:

- all handshakes and the reset;
- the fixed-point format and the tap encoding;
- the internal line buffer and the in-place Mallat layout;
- two MACs (one per filter);
- the Kogge-Stone and Wallace choices;
- the reading of the unnamed compensation circuit as the two's-complement
  correction;
- the subband order and framing of the bit stream;
- the serial receiver of Stage 2;
- every quantiser step and threshold value;
- the run-length token format.

**Departures and omissions:**

- **Pixel storage.** Input pixels are stored one per 16-bit word, not two
  pixels per word. This lets the transform overwrite the frame in place
  (512 KiB).
- **No boundary extension.** Symmetric extension at the image borders is not
  done, because the two-tap Haar pair on even-length lines never reaches past
  a border.
- **Stage 2 runs in line.** It runs in line with Stage 1, on the serial
  stream, rather than on a second processing element with its own memory
  behind a host computer.
- **No entropy coder.** The entropy coder of Stage 2 is not implemented,
  because its code (Huffman, arithmetic, tables) is not specified. The
  run-length tokens are the last output.
- **No software steps.** Image acquisition, resizing to the working matrix
  size and display are software steps and are not part of the RTL.
- **Accumulator format.** The accumulator holds a resolved binary value. It
  does not keep the carry in carry-save form between operations.

## Verification

Every block has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. Each testbench has a cycle watchdog. The
testbenches and what they check:

- **Arithmetic blocks.** Random and corner operands are compared with the
  simulator's own arithmetic, including the Booth digits against the
  digit formula and the printed recoding examples. The adder is also
  tested exhaustively at 6 bits.
- **`tb_dwt_2d`.** Two 16 x 16 frames are loaded, with gaps in the pixel
  stream, and compared word by word against a reference Haar model
  (`tb/tb_haar_pkg.sv`). The transform time of 2*S*(3S+1) clocks per level
  is checked.
- **`tb_output_writer`.** It checks word order, tags, 18 clocks per word,
  and pausing with `en`.
- **Stage-2 testbenches.** These compare against a model in
  `tb/tb_s2_model_pkg.sv`. The run-length test also forces
  maximum-length runs.
- **`tb_dwt_top`.** This is end to end at N = 32. Three RGB frames are sent,
  one per mode, and every output word and every token is checked. It also
  counts that each mechanism occurred: input gaps, row and column passes,
  all three levels, all subband types, output pauses, memory reuse, mode
  changes, thresholding and zero runs.
- **`tb_dwt_top_full`.** One full 512 x 512 frame runs at the default
  parameters. All 262,144 words and all tokens are compared, and the
  transform time of 2,066,176 clocks is checked. It takes about 10 s in
  Verilator.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dwt_pkg.sv tb/tb_haar_pkg.sv tb/tb_s2_model_pkg.sv tb/tb_dwt_top.sv \
    --top-module tb_dwt_top -Mdir obj_top
obj_top/Vtb_dwt_top
```

Use the same command for any other `tb_<name>`. The packages are needed
only by the testbenches that import them.

Known lint notes: some bits of intermediate signals are deliberately unused,
for example the upper bits of the wrapped 34-bit MAC result and the low bits
of the 1/3 constant product. They give unused-signal warnings only.

## Changing the design

- **Image size.** `N` must be a power of two, at least `2^(LEVELS+1)`.
- **Levels.** `LEVELS` can be 1 to 3. `level` and `band_level` are 2 bits
  wide, and `FRAC = 2*LEVELS` must stay within the 16-bit word.
- **Filter.** The taps are `LP_TAP*` and `HP_TAP*` in `dwt_pkg`, in Q1. A
  different two-tap filter only needs new taps. A longer filter needs a
  different pair schedule in `dwt_2d` and border extension.
- **Stage-2 tables.** The quantiser and threshold tables are the `always_comb`
  blocks at the top of `quantizer` and `zero_threshold`.
