# MPEG-4 texture coding engine

This is the texture-coding part of an MPEG-4 Simple Profile video encoder, written in
SystemVerilog. For each 16x16 macroblock it runs these steps in turn:

- the 8x8 forward DCT of its six blocks (four luminance blocks Y1..Y4, then Cb and Cr)
- quantization
- AC/DC prediction of intra blocks, feeding a VLC coder
- inverse quantization and the inverse DCT, giving the encoder its reconstructed picture

Everything is built around one shared 2-D DCT/IDCT unit. The unit alternates forward and inverse
blocks, so one transform serves both the coding loop and the reconstruction loop. The design
target is a CIF picture (352x288, 22x18 macroblocks) at 30 frames/s. At about 1100 clock cycles
per macroblock, that needs a clock of roughly 14 MHz.

The VLC coder, the motion estimation/compensation engine, the AMBA bus with its arbiter and the
frame memory are outside this engine. Their signals are ports of `texture_top`.

## Data path at a glance

```
             I frame: AMBA read            P frame: MC errors
                     \                        /
                      ping-pong buffer (2 x 96 x 36)
                                |
          +-----------> 2-D DCT/IDCT (row 1-D unit, transpose memory, column 1-D unit)
          |                    | forward output
          |                 quantizer --------------------------+--> VLC outputs (inter)
          |                    |                                |
          |              inverse quantizer             AC/DC prediction --> VLC outputs (intra)
          |                    |                                ^
          +--------------------+ inverse input        prediction memory 742 x 12
                                 inverse output --> 4-pixel packer --> AMBA write (I frame)
                                                                   --> MC unit (P frame)
```

The macroblock types:

- **Intra macroblocks** code pixel values. The quantized coefficients go through AC/DC prediction
  before the VLC outputs.
- **Inter macroblocks** code the motion-compensation errors. Their quantized coefficients go to
  the VLC outputs directly.

The frame types:

- **I frame:** the engine fetches its input over the bus itself and writes the reconstructed
  pixels back over the bus.
- **P frame:** the motion-compensation unit fills the ping-pong buffer and takes the
  reconstructed errors back.

## Macroblock schedule

`texture_ctrl` works block by block:

1. It starts a read of block *b* from the ping-pong buffer. The 64 pixels stream into the
   transform, one per cycle.
2. For an intra macroblock, it starts the AC/DC predictor on block *b* at the same time.
3. It waits until the 64th dequantized coefficient of block *b* has entered the transform as
   an inverse block.
4. It then starts block *b+1*.

As a result, the transform input alternates: forward block 0, inverse block 0, forward block 1,
and so on. The pipeline delays are:

| Stage | Latency |
| --- | --- |
| 2-D transform | 90 cycles |
| Quantizer | 4 stages |
| Inverse quantizer | 4 stages |

One block period is therefore about 164 cycles. With the end of the last inverse transform and
the handshake added, a macroblock takes 1075 to 1191 cycles, about 1082 on average. The design
figure this aims at is 1137 cycles with a 97-cycle transform.

After block 5 the controller waits for four things:

- the last reconstructed sample
- the AC/DC predictor
- the bus writes
- any bus read still running

It then reports `texture_rsp = 2` (finish) until `Ctrl_texture_ack` arrives.

In an I frame the first macroblock is fetched before coding starts. Each later macroblock is
fetched during the chrominance blocks of the one before it, into the other half of the ping-pong
buffer. A macroblock uses the half given by the parity of its position in the frame.

## 2-D DCT/IDCT (`dct2d`, `dct_1d`, `transpose_mem`)

The transform uses row-column decomposition: a row 1-D unit, a 64x16 transpose memory, and a
column 1-D unit.

Each 1-D unit computes the 8-point DCT or IDCT with a fast algorithm that uses only **four
multipliers**. The unit has five stages:

1. **Serial to parallel.**
2. **Pre-processor.** Butterflies turn the eight inputs into operand groups d8, d4, d2 and s2.
3. **Multiplier-adder.** It produces one output term per cycle from four products of constants
   `0.5*cos(pi*3^i/(2N))`.
4. **Post-processor.** It recombines the terms for the inverse transform.
5. **Parallel to serial.** It rounds and limits the result.

The constants live in `tex_pkg`:

| Unit | Constant width |
| --- | --- |
| Row unit | 13 bits |
| Column unit | 12 bits |

The word lengths of the units are:

| Word | Width |
| --- | --- |
| Row accumulator | 21 bits |
| Intermediate word | 16 bits |
| Column accumulator | 20 bits |

All rounding is true rounding, with halves away from zero. Truncating instead biases the inverse
transform enough to break the IEEE 1180 mean-error limits.

The transpose memory lets one block be read while the next is written. The two orientations
alternate from block to block:

- In one orientation, the memory is written in row order and read in column order.
- In the other, the roles swap.

Reading a block starts as soon as word 49 has been written. By then the first column to be read
is complete.

The 2-D unit produces the forward transform's output in column order. The inverse transform,
fed in that same order, gives pixels back in raster order. The top keeps track of this by
relabelling positions.

The measured accuracy uses 1200 random blocks per range against a double-precision reference:

| Measure | Value |
| --- | --- |
| Peak error | 1 |
| Worst per-pixel MSE | 0.028 |
| Overall MSE | 0.018 |
| Worst per-pixel mean | 0.011 |
| Overall mean | 0.0009 |

All of these are within the IEEE 1180-1990 limits.

## Quantizer and inverse quantizer

The quantizer follows the H.263 method. It replaces division by multiplication with a reciprocal
`R(x) = floor(2^N/x) + 1`, followed by a shift. The reciprocal tables are computed at elaboration
time. N is 18 here. With 16 bits the result is off by one for some of the larger 12-bit
coefficients.

The rules are:

- **Intra DC:** divided by `dc_scaler`, with rounding. `dc_scaler` follows the MPEG-4 table and
  depends on QP and on luminance or chrominance.
- **Intra AC:** `|F| / (2QP)`.
- **Inter:** `(|F| - QP/2) / (2QP)`.

The quantizer also produces a coded-block flag per block:

- **Inter:** set if any coefficient is nonzero.
- **Intra:** set if the sum of magnitudes exceeds 2, or if position 0, 1 or 8 is nonzero.

On cycles when no coefficient is entering, the quantizer accepts a request from the AC/DC
predictor to normalise a DC predictor by `dc_scaler`. This request uses the
`norm_req`/`norm_ack` handshake.

The inverse quantizer computes:

- `|F| = QP(2|QF|+1)`, minus 1 when QP is even
- intra DC: `QF*dc_scaler`

## AC/DC prediction (`acdc_pred`, `acdc_pred_mem`)

The prediction memory is 742 words of 12 bits:

| Region | Words | Contents |
| --- | --- | --- |
| Horizontal | 704 (8 per block column across the frame) | The DC and first-row AC of the blocks above |
| Vertical | 32 | The DC and first-column AC of the blocks to the left |
| LT_DC_VALUE | 6 | Top-left DC values |

For LT_DC_VALUE, block *b* reads word 1, 0, 3, 2, 4, 5 for *b* = 0..5 and stores its top
neighbour's DC into word *b*.

Per block, the state machine does the following:

1. It reads the left (A), top-left (B) and top (C) DC values.
2. It predicts from the top if `|A-B| < |B-C|`, otherwise from the left. A neighbour outside
   the frame counts as DC 1024 with zero AC.
3. It normalises the chosen DC through the quantizer.
4. It fetches the seven AC predictors of that neighbour.
5. It collects the 64 quantized coefficients and the dequantized DC.
6. It stores this block's predictors.
7. It sends the 64 values to the VLC in raster order:
   - The DC is always sent as a prediction error.
   - The seven AC values are sent as errors only if that lowers their sum of magnitudes
     (`acdcp_flag`).
8. It sends the coded-block flag.

After block 5 it repeats the six flags.

The scan logic reports each coefficient's place in the scan to use:

| Prediction | Scan |
| --- | --- |
| From the top | Alternate-horizontal |
| From the left | Alternate-vertical |
| No AC prediction | Zigzag |

## Ping-pong buffer, packer and bus master

The ping-pong buffer has two 96x36 RAMs. Each RAM holds one macroblock: 6 blocks of 16 words,
each word four 9-bit pixels. One RAM is written while the other is read. A block is read out as
64 pixels in raster order. The first pixel appears on the third clock edge after `en_rd`.

The packer `s2p4` regroups reconstructed pixels four to a word with a {block, word} address.

The bus master `amba_master` has the states IDLE, REQUEST, GET_RADDR/GET_WADDR, READ, WRITE and
FINISH. It does two jobs:

- **Read:** fetches 96 words of a macroblock.
- **Write:** writes the reconstructed words from a 32-entry FIFO, sixteen writes per block.

It never reads and writes at the same time, and pending writes go first.

Bus transfers have this timing:

- The address phase comes first, then the data phase. There are no wait states, because the
  engine has no ready input.
- The bus is held from the grant (`bus_user` = 1) to the end of the job.

The frame is stored as planar bytes: Y, then U, then V. The addresses are:

- **Luminance:** base + y offset + (16*mb_y + row)*352 + x offset + 16*mb_x + column
- **Chrominance:** the same form, with 8 instead of 16 and width 176

## Top-level pins

The pins follow the design's pin list, with these differences:

- The memory-BIST pins are left out.
- `q_scan_idx` is added.
- `vlc_cbp_valid` is added.

Handshake and timing:

- Inputs are sampled when `Ctrl_texture_en` is pulsed and must hold until finish.
- `texture_rsp` is 0 for idle, 1 for busy and 2 for finish.
- `IDCT_data_*` carry P-frame reconstructions: four 9-bit errors and a {block, word} address.
- `IDCT_cbp` is the block's coded-block flag.

## Where this design departs from the original

- **Transform latency:** 90 cycles instead of 97. The macroblock period comes out near 1082
  cycles instead of 1137.
- **Reciprocal width:** 18 bits instead of 16. This makes quantization exact.
- **Intra coded-block rule and AC-prediction decision:** the rule is the one described above, and
  AC prediction is decided per block by sum of magnitudes.
- **AC predictors:** they are not rescaled when QP changes between macroblocks.
- **Unavailable neighbours:** only frame edges count as unavailable. In a P frame, an inter
  neighbour of an intra macroblock still supplies its stored values.
- **Bus timing and frame layout:** these are this design's own choices.
- **Memory BIST:** not included.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
| --- | --- |
| `tb_dct_1d` | The 1-D unit against a floating-point reference |
| `tb_dct2d` | The IEEE 1180 statistics and the 90-cycle latency |
| `tb_transpose_mem` | Order and latency with gaps |
| `tb_quantizer`, `tb_inv_quantizer` | Exact agreement with integer reference formulas over the full ranges and every QP |
| `tb_acdc_pred` | The VLC stream against a reference model on a 3x2-macroblock frame |
| `tb_scan_order` | The scan order against the standard scan tables |
| `tb_acdc_pred_mem` | The prediction memory |
| `tb_pingpong_buffer` | The ping-pong buffer |
| `tb_s2p4` | The packer |

The end-to-end bench `tb_texture_top` runs a 3x2-macroblock frame. The bench models the frame
memory, the arbiter and the motion-compensation unit. It codes an I frame and part of a P frame,
and checks the following:

- The reconstruction stays close to the original.
- For inter macroblocks, it decodes the VLC coefficients itself and matches the engine's
  reconstruction within 1.
- The coded-block flags and the handshake are correct.
- Every mechanism occurs: bus reads and writes, MC fills, both prediction directions, AC
  prediction on and off, all three scans, and both flag values.

`tb_texture_top_full` does the same on a full CIF frame at the default parameters. It takes a few
minutes.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal rtl/tex_pkg.sv $(ls rtl/*.sv | grep -v tex_pkg) \
  tb/tb_texture_top.sv --top-module tb_texture_top -o sim && ./obj_dir/sim
```

Lint notes:

- **`SYNCASYNCNET` warning on the reset:** it comes from the reset being used both as the
  asynchronous flop reset and in the `disable iff` of assertions. It is expected.
- **Unused `ME_MB_X` bits:** only bit 0 is used.
