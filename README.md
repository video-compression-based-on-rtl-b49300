# SIMD lossless-JPEG video frame compressor

This is a small, fully streaming compressor for uncompressed YCbCr video frames.
It is lossless. Each 8-bit sample is replaced by the error of a simple planar
prediction from its left, upper and upper-left neighbours. Sequences of equal
errors are then run-length coded, and the run counter is only **3 bits** wide.
A frame is cut into vertical strips, and several identical processing units
compress the strips at the same time under one controller, so throughput grows
with the number of units (SIMD: single control, multiple data).

The hardware holds no frame. A host streams the samples in, two rows side by side,
and takes out `(value, count)` pairs. At the default size (4 units, 480×640 frames,
3 layers), one frame takes 231 841 clocks. That is 4.64 ms at 50 MHz, or 200 Msamples/s.

```
            +---------------------- simd_ljpeg_compressor ----------------------+
            |  preproc_ctrl  (row_p / col_p / layer counters, padding flags)    |
 req,layer, |      | slot, pad_row, pad_col, eof    (shared by all units)       |
 row, col <-+      v                                                            |
            |  +------------ ljpeg_pu [k], k = 0..NUM_PU-1 ------------+        |
 din1[k] ---+->|  predictor: din1/din2 -> I_B,I_X -> I_C,I_A -> I_D    |        |
 din2[k] ---+->|  mrle_encoder: I_temp / I_counter -> dout,counter,last|--------+--> dout[k], counter[k], last[k]
            |  +-------------------------------------------------------+        |
            +-------------------------------------------------------------------+
```

## Scan order and zero padding

Each layer (Y, Cr, Cb, processed in that order) is an `FRAME_H × FRAME_W` array.
Unit *k* owns columns `k·PART_W … (k+1)·PART_W−1`, with `PART_W = FRAME_W / NUM_PU`.

The prediction needs a left, an upper and an upper-left neighbour for every
sample. So every strip is treated as if it had one row of zeros above it and
one column of zeros to its left. This applies to every strip, not only to the
frame: a unit never sees the neighbouring strip's samples.

`preproc_ctrl` walks this padded strip with two position counters:

* `col_p` runs `1 … PART_W+1`. `col_p = 1` is the padding column. No sample is
  requested in that slot, and both predictor inputs are forced to zero.
* `row_p` runs `1 … FRAME_H`. While `row_p = 1`, the upper-row input is forced
  to zero. This is the padding row. It is never scanned as a row of its own.
* After the last row of the last layer, one extra **end-of-frame slot** travels
  down the pipeline and makes each encoder close its open run.

One frame therefore occupies the controller for

    clocks = LAYERS · FRAME_H · (PART_W + 1) + 1

| units | clocks per 480×640×3 frame | time at 50 MHz | samples/s | non-sample clocks |
|------:|---------------------------:|---------------:|----------:|------------------:|
| 1     | 923 041                    | 18.46 ms       | 50 M      | 1 441 (0.16 %)    |
| 2     | 462 241                    | 9.24 ms        | 100 M     | 1 441 (0.31 %)    |
| 4     | 231 841                    | 4.64 ms        | 200 M     | 1 441 (0.62 %)    |

The 1 441 non-sample clocks are the 3·480 padding-column slots plus the
end-of-frame slot. Their number does not depend on the number of units, so
their share grows as the units get faster.

## The predictor (`predictor.sv`)

The predicted sample is `X' = A + B − C`, where A is the left neighbour, B the
upper neighbour and C the upper-left neighbour. The unit outputs `P = X − X'`.
On smooth image areas and planar ramps, P is zero or nearly constant. This is
what makes the later run-length code effective.

The unit needs no line buffer. The host supplies the current row (`din2`) and
the row above it (`din1`) in the same clock. The left-hand pair is the previous
column, which is still in the pipeline:

| clock | registers loaded                                                    |
|-------|---------------------------------------------------------------------|
| 1     | `din1 ← upper sample` (0 if padding), `din2 ← current sample` (0 in the padding column) |
| 2     | `I_B ← din1`, `I_X ← din2`, `I_C ← I_B`, `I_A ← I_X`                 |
| 3     | `I_D ← I_X − (I_A + I_B − I_C)`                                      |

The padding-column slot loads zeros into `I_X`/`I_B`. At the first real column,
`I_A`/`I_C` are therefore zero. The same slot also flushes the end of the
previous row out of the window. That is why the design spends one clock per row on it.

**Width of P.** `I_D` is 9 bits and is kept **modulo 512**. The true difference
spans −510…510, which 9 bits cannot hold. The code is still lossless because the
decoder needs X only modulo 256:

    X = (P + A + B − C) mod 256

Here A, B and C are samples the decoder has already rebuilt, and they are zero
in the padding. Treat `dout` as an unsigned 9-bit code, not as a signed number.

## The modified run-length code (`mrle_encoder.sv`)

The encoder keeps the value of the open run in `I_temp` and its length in
`I_counter`. For each incoming P:

* If P equals `I_temp` and `I_counter` is below `2^CNT_W − 1` (7), the count
  is incremented.
* Otherwise, the open run is emitted as `(dout, counter)` with a one-clock
  `last` strobe, and a new run starts with P and a count of 1.

The end-of-frame slot emits the final run. Runs are **not** broken at row or
layer ends, only at the frame end, so a run may continue from one row into the
next. A run longer than 7 is split. Example:

    83, 0×9, 3, 0×9, 12, 0×4
    → (83,1) (0,7) (0,2) (3,1) (0,7) (0,2) (12,1) (0,4)

Each pair costs `9 + CNT_W` bits, so the example costs 8 × 12 = 96 bits instead
of 25 × 8 = 200. An 8-bit counter would need 6 pairs × 17 bits = 102 bits here.
After prediction, most runs are short, and the wide counter pays more for the
rare long runs than it saves.

The compression ratio is `8·samples / ((9+CNT_W)·pairs)`. It depends entirely on
the picture. Published results for this scheme on standard test sequences (Akiyo, Foreman,
Bridge and others at 480×640) range from about 1.2 to 1.9. Splitting the
frame into more strips lowers the ratio slightly, because runs are cut at strip
borders and every strip restarts with zero neighbours. The 3-bit counter is a
parameter (`CNT_W`) so that the trade-off can be measured on your own material.

## Interface and timing

Top module: `simd_ljpeg_compressor`. The run-pair outputs come straight from
registers; the controller outputs are simple decodes of its state registers.
The clock is `clk` and the reset is `rst_n`, which is asynchronous and active low.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `start` | in | 1 | start a frame; accepted while `busy` is low |
| `busy` | out | 1 | high for exactly `LAYERS·FRAME_H·(PART_W+1)+1` clocks |
| `done` | out | 1 | one-clock pulse with the last pair of the frame, 4 clocks after the last `busy` clock |
| `req` | out | 1 | a sample pair is wanted in this clock |
| `req_layer`, `req_row`, `req_col` | out | 2, ⌈log2(FRAME_H+1)⌉, ⌈log2(PART_W+1)⌉ | layer; 0-based row; 0-based column inside each strip |
| `din2[k]` | in | 8 | `layer[req_layer][req_row][k·PART_W + req_col]` |
| `din1[k]` | in | 8 | the sample one row above; ignored when `req_row = 0` |
| `dout[k]`, `counter[k]`, `last[k]` | out | 9, `CNT_W`, 1 | run pair of unit *k*, valid while `last[k]` = 1 |

* **Sample source.** The source must answer a request **combinationally, in
  the same clock**. There is no back-pressure and no stall: the design assumes
  a source that can always keep up, such as a FIFO read in first-word-fall-through style.
* **Output.** Units emit pairs independently, at most one per clock each, and
  `last[k]` is a strobe. The receiver must accept every pair. To decode, keep
  each unit's pairs apart, expand them into P values in scan order (layer, row,
  column of the strip), and rebuild each sample with the formula above.
* **Latency.** A sample reaches the encoder 3 clocks after it is requested.
  The pair that closes on it appears 1 clock later.

## Parameters

| parameter | default | where | notes |
|-----------|---------|-------|-------|
| `NUM_PU` | 4 | top | number of processing units; must divide `FRAME_W`. 1, 2 and 4 are the evaluated configurations |
| `FRAME_H`, `FRAME_W` | 480, 640 | top | frame size per layer |
| `CNT_W` | 3 | top, `ljpeg_pu`, `mrle_encoder` | repetition counter width; 2…8 were simulated |
| `PART_W` | 640 | `preproc_ctrl` | strip width, set by the top to `FRAME_W/NUM_PU` |
| `PIX_W`, `PRED_W`, `LAYERS` | 8, 9, 3 | `ljpeg_pkg` | sample width, difference width, colour layers |

The logic is tiny: per unit, about 90 flip-flops and a 9-bit add/subtract,
compare and increment. No memory is used, and the frame size only affects the
counter widths.

## Where this RTL makes its own choices

The behaviour above follows the original description of the design: the
register set, the padding rule, the prediction formula, the run rule, the strip
split and the clock counts. The points below are this implementation's own
choices, or readings of places where the description was ambiguous or
inconsistent:

* **Register routing in the predictor.** `din1` (upper row) goes to `I_B`/`I_C`
  and `din2` (current row) to `I_X`/`I_A`. This matches the prose and the
  register table. The block diagram of the original draws the two inputs the
  other way round.
* **Where `I_D` holds what.** `I_D` holds the final difference `X − X'` and
  feeds the encoder directly. The original register table instead lists
  `I_D = A + B − C` plus a separate output register, and its encoder diagram
  shows another `I_D` input register. Folding these into one register removes
  one pipeline stage and changes nothing else.
* **Modulo-512 difference.** The description calls the 9 bits enough for values
  above 255. The full range needs more bits, so this RTL wraps the difference
  modulo 512 and relies on the decoder working modulo 256 (see above).
* **One shared controller.** Only the predictor and encoder are replicated;
  all units follow one `preproc_ctrl`.
* **End-of-frame slot.** The published clock counts contain exactly one clock
  beyond the sample and padding slots. Here that clock is the slot that closes
  the last run. The `start`/`busy`/`done` handshake, the request ports and the
  combinational source timing are also this design's own.
* **Runs across rows.** Runs continue across rows and layers and are closed only
  at the frame end.
* **Reset** is asynchronous, active low, and clears every register.

The following are **not** included: the host software that splits video into
frames, and the vendor co-simulation link that carried samples between PC and
FPGA. The top-level ports stand where that link would connect.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_preproc_ctrl` | slot flags and request coordinates cycle by cycle; busy length; single `done` pulse |
| `tb_predictor` | P against `X − (A+B−C) mod 512` on random layers with 0/255 extremes; garbage in padding slots is ignored; 3-clock latency |
| `tb_mrle_encoder` | the worked example above pair by pair; random streams with gaps and long runs against a model; 1-clock pair latency |
| `tb_ljpeg_pu` | predictor + encoder on small 3-layer images with flat and noisy halves; final-pair/eof timing |
| `tb_simd_ljpeg_compressor` | **default size**: two 480×640×3 frames on 4 units. Every pair of every unit is checked against a reference model. Each frame is **decoded from the pairs and compared sample by sample**. Each frame must take 231 841 clocks. The test also requires that top padding, left padding, run split at 7, run break, layer change and output from every unit all occur |
| `tb_simd_video` | a 300-frame clip (10 s at 30 frames/s) of 480×640×3 frames on 4 units, started back to back, every frame checked as above; it must fit in real time at 50 MHz (it takes 69 552 300 clocks, 1.39 s) |
| `tb_simd_scaling` | 480×640×3 frame with 1, 2 and 4 units (must take 923 041 / 462 241 / 231 841 clocks) and with counter widths 2…8 on one unit. Same pair and decode checks; prints the compression ratio of each configuration |

`ljpeg_host_model.sv` is the behavioural host and scoreboard used by the two
system-level benches. It generates synthetic frames on the fly from 16×16
tiles that are flat, planar, slightly noisy ramps, or noise. The published test
videos are not reproduced, so the ratios printed by the benches reflect this
synthetic content only. At the default size, the synthetic frames compress by
about 1.5.

Running a bench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ljpeg_pkg.sv tb/tb_simd_ljpeg_compressor.sv \
    --top-module tb_simd_ljpeg_compressor
./obj_dir/Vtb_simd_ljpeg_compressor
```

Replace the testbench name to run any other bench. The full-size bench builds
in about half a minute and runs in under a second. `tb_simd_scaling` holds nine
compressor instances and builds in about two minutes; `tb_simd_video` runs for
about a minute and a half. The RTL carries a few
concurrent assertions: requests stay inside the strip, an emitted run never has
count 0, eof slots carry no sample, and all units finish together. Build with
`--assert` to enable them.
