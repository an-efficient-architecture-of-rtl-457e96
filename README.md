# MPEG-4 transform and quantization module (DCTQ)

An MPEG-4 video codec needs a forward DCT, a quantizer, AC/DC prediction and
scan on the encoder side. To rebuild the reference picture it also needs the
inverse quantizer and an inverse DCT. The decoder needs the same chain run
backwards. This RTL puts that whole chain into one small module, the DCTQ.
It aims at 30 frame/s CIF encoding plus decoding with a 27 MHz clock. Two
ideas keep it small:

* **One 1-D transform core per direction.** A 2-D DCT is normally two 1-D
  units with a transposition memory (TM) between them. Here a single
  bit-serial distributed-arithmetic (DA) core does both passes. It alternates
  every 8 clocks between a new input row and a TM column from the row pass.
* **One line of prediction memory.** MPEG-4 predicts a block's DC and first
  row or column from its left, top-left and top neighbours. The obvious
  memory holds two block rows of DC values. Here the top neighbour's DC is
  copied into a 6-word "left-top" store at the moment it is read. One
  block row of memory is then enough.

The design follows the architecture published as "An Efficient Architecture
of Transform & Quantization Module in MPEG-4 Video Codec". Where that
description is silent, the choices made here are listed in
[Departures and own choices](#departures-and-own-choices).

## Data flow

```
 encoder:  pixels -> FDCT -> Q -> AC/DC prediction -> scan -> QCO buffer -> (VLC)
                              \-> IQ -> IDCT -> reconstructed pixels -> (frame memory)
 decoder:  (VLD) -> QCO buffer -> inverse scan -> AC/DC prediction -> IQ -> IDCT -> pixels
```

Encoding and decoding are separate operations on one set of hardware. The
`mode` input selects which one a macroblock runs. In the encoder the
reconstruction loop takes the quantized levels before prediction. In the
decoder IQ takes the output of the prediction stage. The quantized
coefficient (QCO) buffer holds one macroblock of 6 x 64 levels in scan order.
Its second port faces the entropy coder (VLC) or decoder (VLD). Neither of
those is part of this design.

| module | role |
|---|---|
| `dctq_pkg` | widths, types, DA weights, scan tables, DC scaler |
| `dct1d_core` | 8-point DA DCT/IDCT: SPC -> shuffle & RAC -> PSC |
| `dct_tm` | 64 x 16 transposition memory |
| `dct2d` | 2-D DCT or IDCT of a macroblock: core + MUX + TM + schedule |
| `q_iq`, `udiv_recip` | quantizer and inverse quantizer; reciprocal divider |
| `pred_mem` | 742 x 12 prediction RAM |
| `acdc_pred` | direction decision, DC/AC DPCM, scan selection |
| `scan_ctrl` | scan / inverse-scan addressing into the QCO buffer |
| `qco_buf` | 384 x 12 two-port QCO buffer |
| `dctq_ctrl` | macroblock sequencer (fixed event clocks) |
| `dctq_top` | the whole module |

## The 1-D core

`dct1d_core` uses Chen's even/odd split. Let s_i = x_i + x_(7-i) and
d_i = x_i - x_(7-i). The even outputs are 4-term sums over s_i, and the odd
outputs are 4-term sums over d_i. The inverse transform uses the transposed
weights. Each sum is computed by distributed arithmetic. A 16-entry ROM holds
the weight sum for every combination of one bit from each of the 4 inputs.
An accumulator adds the ROM words bit by bit, MSB first, and subtracts the
word for the two's-complement sign bit. The ROM words are
round(2^15 * cos(k*pi/16) / 2) summed over the selected inputs. They are
computed by a function in the package, not stored as a table.

The pipeline has three 8-clock steps:

1. **SPC** collects 8 serial samples.
2. **Shuffle and RAC** forms s_i and d_i, then runs the 8 ROM-accumulators.
3. **PSC** shifts the 8 results out serially.

A vector therefore leaves 16 clocks after its first sample enters. A new
vector can enter every 8 clocks. A 16-bit word in 8 clocks needs two bits
per clock, so each accumulator handles bit 15-t and bit 7-t in clock t. Two
shift-add paths do this work.

## The 2-D schedule (the hardest part)

`dct2d` time-multiplexes the single core. Count 8-clock slots from `start`:

* external row r (0..7) of block b enters in slot 16b + 2r;
* TM column c of block b enters in slot 17 + 16b + 2c;
* each vector leaves the core two slots after it entered.

In every 16-clock period the first 8 clocks take a fresh input row. The last
8 clocks take a column of the previous block's row results. Row results of
block b go into the TM, and column results leave on `out_*`. The first 2-D
result leaves 152 clocks (19 slots) after the first input. The last one
leaves at the end of slot 113, so a 6-block macroblock takes 114 x 8 = 912
clocks.

Only 64 words of TM are needed because of the order of reads and writes.
Column c of block b is read in the same period in which row c of block b+1
is written. Row c of block b+1 is written into exactly the 8 places that
column c of block b has just freed. The TM therefore switches between
row-major and column-major addressing on every block, using block parity.
The TM reads one clock ahead and returns the old word on a same-address
read and write. The memory-reuse scheme depends on that.

Data order and scaling:

* The forward transform takes each pixel column as one input vector
  (`pix_idx = x*8 + y`) and returns coefficients in raster order
  (`u*8 + v`). The inverse transform takes raster order and returns pixel
  columns.
* Inputs are shifted left by 4 bits (`FRAC`) into the 16-bit word.
* The core rounds its results to odd: it truncates, then sets the LSB if any
  dropped bit was 1. The final stage rounds to nearest and saturates to 12
  bits (FDCT) or 9 bits (IDCT). Rounding to odd avoids the bias of rounding
  twice.

## AC/DC prediction and its memory

Inside a macroblock the luminance blocks are numbered 0 1 / 2 3. Blocks 4
and 5 are U and V. For each intra block the predictor needs three DC values:
A (left), B (left-top) and C (top).

* If |A - B| < |B - C| the block is predicted from the top. Its DC and first
  row are predicted from block C.
* Otherwise the block is predicted from the left. Its DC and first column
  are predicted from block A.
* AC prediction is used only when `ac_pred_en` is set. The scan choice
  follows it: alternate-horizontal for top prediction, alternate-vertical
  for left prediction, and zig-zag for inter blocks or no AC prediction.
* A neighbour outside the picture, or in an inter macroblock, counts as
  DC = round(1024 / dc_scaler) with zero AC.

`pred_mem` is one 742-word RAM with three regions:

| region | words | contents |
|---|---|---|
| horizontal | 22 x 32 | per macroblock column: four 8-word areas (Y top pair, Y bottom pair, U, V); DC + first row of the last block stored there |
| left-top store | 6 | one DC per block index |
| vertical | 4 x 8 | DC + first column of the left neighbours in the current macroblock row |

The horizontal region holds one block row only. A block overwrites the
slot of its top neighbour, so the top-left DC of a later block would be
lost. It is saved first. Whenever block k reads its top DC, it also writes
that value to left-top word k. Block k then takes its B from left-top word
1, 0, 3, 2, 4, 5 for k = 0..5. For example, the top neighbour of block 1 is
the top-left neighbour of block 0 in the next macroblock.

Timing:

* After `blk_start` the predictor reads B, then A, then C on consecutive
  clocks.
* The next clock decides the direction and the DC predictor.
* `dir_top` and `scan_sel` are valid 5 clocks after `blk_start`.
* After that, each level goes in and its result comes out two clocks later.
* The encoder outputs `level - prediction`; the decoder outputs
  `level + prediction`. Both saturate to 12 bits.
* Each block's DC and first row or column are stored for later blocks as
  they stream through.
* QP is assumed constant over a picture, so stored values are never
  rescaled.

## Quantization

`q_iq` implements the MPEG-4 H.263-style method:

| coefficient | quantize | dequantize |
|---|---|---|
| intra DC | (\|F\| + dcs/2) / dcs | QF x dcs |
| intra AC | \|F\| / (2 QP) | QP (2\|QF\| + 1) - (1 if QP even) |
| inter | (\|F\| - QP/2) / (2 QP) | same as intra AC |

Here dcs is the MPEG-4 DC scaler for luminance or chrominance. Signs are
restored after the division, and results saturate to 12 bits. Division is a
multiplication by ceil(2^18 / d), which is exact for 12-bit numerators.
Q and IQ each take one clock.

## Macroblock timing

`dctq_ctrl` starts every stage at a fixed clock after `start`:

| | encoder | decoder |
|---|---|---|
| FDCT start | 0 | — |
| prediction block b | 148 + 128 b | 2 + 128 b |
| QCO reads (raster u,v of block b) | — | 8 + 128 b + 16 u + v |
| IDCT start | 154 | 11 |
| done | 1066 (1067 clocks) | 923 (924 clocks) |

The decoder reads the QCO buffer only in the first 8 clocks of each 16.
Each level therefore reaches the IDCT exactly when the IDCT takes external
input.

At 27 MHz, 30 CIF frames is 11 880 macroblocks/s each way. That needs
(1067 + 924) x 11 880 = 23.7 M clocks/s, which fits.

## Interface of `dctq_top`

* **Control.** `start` (one pulse), `mode` (`MODE_ENC`/`MODE_DEC`),
  `intra`, `ac_pred_en`, `qp`, `mb_x` and `mb_y` are held for the whole
  macroblock. `busy` stays high during the run, and `done` pulses on its
  last clock.
* **Pixels in (encoder).** When `pix_ready` is high, the module samples
  `pix_data` in the same clock for block `pix_blk` and index `pix_idx`.
  There is no back-pressure.
* **Pixels out.** `rec_valid`, `rec_blk`, `rec_idx` and `rec_data` carry the
  reconstructed pixels. The first arrives 306 clocks after the first pixel
  goes in.
* **QCO port (VLC/VLD side).** `qco_en`, `qco_we`, `qco_addr` and
  `qco_wdata` drive the port, and `qco_rdata` returns one clock after the
  address. The address is block x 64 + scan position. The internal port
  wins a write collision.

## Verification

Every block has a self-checking testbench in `tb/`. Reference models live in
`tb/dctq_ref_pkg.sv`: floating-point DCT, integer-division quantizer and
scan tables written as position-to-index lists.

| testbench | what it checks |
|---|---|
| `tb_dct1d_core` | 200 vectors (some near full scale) within 1 LSB of the exact transform, both directions; 16-clock latency |
| `tb_dct_tm` | random reads/writes, read-before-write |
| `tb_dct2d` | 167 macroblocks; FDCT within 1 of exact; IDCT statistics in the manner of IEEE 1180 over 1002 blocks (peak 1, peak MSE 0.029, overall MSE 0.017, peak mean 0.009, overall mean 0.0002); 152-clock first result, 912-clock macroblock |
| `tb_q_iq` | 20 000 random values, exact match for all modes and QP |
| `tb_pred_mem` | random access over the full CIF-sized RAM, reads past the end |
| `tb_acdc_pred` | 12-macroblock picture, encoder against a whole-picture model, decoder round trip; each direction, scan, edge and inter neighbour, saturation |
| `tb_scan_ctrl` | addresses against the three scan orders, decoder read return |
| `tb_qco_buf` | both ports, collisions |
| `tb_dctq_ctrl` | every event clock of both modes |
| `tb_dctq_top` | full module at default parameters: 3x3 macroblocks, two pictures (QP 6 and 13), intra/inter, AC prediction on/off, encode then decode; compares coefficients, levels, buffer contents, reconstructed and decoded pixels with the reference chain; counts each mechanism (top/left prediction, each scan, edge and inter neighbours, decoded blocks) |

Run one of them with plain Verilator, for example:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/dctq_pkg.sv tb/dctq_ref_pkg.sv \
    tb/tb_dctq_top.sv --top-module tb_dctq_top
./obj_dir/Vtb_dctq_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

## Departures and own choices

* **Macroblock time.** A macroblock takes 1067 clocks to encode and 924 to
  decode. The source architecture quotes 1064 (912 + 152). The difference
  comes from the registered Q and IQ stages and the two-clock prediction
  stage.
* **DA bit rate.** The RAC takes 2 bits per clock so that each pipeline step
  is still 8 clocks long. The source describes 1-bit serial DA with 8-clock
  steps.
* **Rounding.** The core rounds to odd, and the 2-D unit rounds to nearest
  and saturates.
* **Data order.** Pixels enter and leave column by column.
* **Quantizer.** Only the H.263-style method is built, not the MPEG-4
  weighting matrices.
* **QP.** QP is constant within a picture, so stored predictions are not
  rescaled.
* **Prediction memory.** The vertical area also holds the left neighbour's
  DC. The split of the 742 words into areas is inferred from their sizes.
* **Total RAM.** The RAMs add up to 15 560 bits: 2 x 64 x 16 + 742 x 12 +
  384 x 12.
* **Not included.**
  * The short-video-header (H.263) mode. That mode turns AC/DC prediction
    off and uses a fixed DC quantizer.
  * The AMBA bus interface: only its size is known.
  * VLC/VLD.
  * The frame memory.

  Their connections are ports of the top.
