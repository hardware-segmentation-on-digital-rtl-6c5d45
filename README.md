# Hue-band segmentation of leukaemia blood-smear images

In a stained smear from a patient with acute lymphoblastic leukaemia, the
nuclei of the blasts (immature white cells) take on a blue-violet colour. Red
cells stay pink and the background stays pale. Hue alone separates the blasts
from everything else. This core receives an image already converted to HSV
(hue, saturation, value) and streams it through in raster order:

- A pixel whose hue lies strictly between **A1 = 0.59375** and **A2 = 0.8125**
  keeps its own colour.
- Every other pixel is replaced by white.

The output picture shows the blasts alone on a white ground.

The logic is small. At its default timing it is two 10-bit threshold stages,
one 3-input merge and 22 flip-flops. It is a SystemVerilog version of a
segmentation core first built as a Xilinx System Generator model for a
Spartan-3E. The port names, widths, thresholds, comparison senses and register
placement follow that model. The points where this RTL adds or departs are
listed in "Departures and open points" below.

## Where the core sits in the whole flow

The full flow has six steps. Only step 3 is hardware; this repository holds
only that step.

1. Convert RGB to HSV (host).
2. Run a 7 × 7 median filter over the hue channel (host).
3. Threshold the hue against A1 and A2, then merge with S and V: **this core**.
4. Turn the sample stream back into a 2-D image (host).
5. Convert HSV back to RGB for display (host).

The host turns each channel of the image into a stream of scalar samples. It
feeds H, S and V to the core in parallel, one pixel per sample, and gathers
the three output streams back into frames. The testbenches play the host's
part: they generate a picture, stream it in and collect the output picture.

## Pixel format

Each channel is a 10-bit unsigned fraction: code `c` stands for `c/1024`.
Hue 0 to 1 covers the full colour circle.

| Quantity | Real value | Code |
|---|---|---|
| A1 (lower threshold, exclusive) | 0.59375 = 19/32 | 608 |
| A2 (upper threshold, exclusive) | 0.8125 = 13/16 | 832 |
| White: saturation | 0 | 0 |
| White: value | ≈ 1 | 1023 |

Both thresholds are exact in this format. The 10-bit width comes from the
original ports, which are 10 bits each: 60 data pins plus a clock. The
position of the binary point is this design's choice. The shared definitions
are in `rtl/hw_seg_pkg.sv`: `pix_t`, `hsv_t`, `A1_CODE`, `A2_CODE`,
`PIX_MAX` and the comparison enum `cmp_e`.

## The threshold pipeline, and its two timings

`hue_threshold_stage` is one level of the threshold. It has three parts:

- a data register (the "delay");
- a comparator against a constant, with its result registered;
- a 2:1 mux that outputs either the delayed hue or 0.

Two stages in series make the band filter:

    H ──► [stage: keep if > A1] ──► [stage: keep if < A2] ──► band-passed hue (0 = reject)

A pixel rejected by the first stage reaches the second stage as 0. It stays 0,
because 0 < A2 only passes the 0 on. A1 is above 0, so a non-zero band-passed
hue always means "blast pixel".

This is the part of the design that needs care. In the original model, the
comparator reads the output of the data register, not its input. The
comparator also has a register of its own. The keep/reject verdict therefore
reaches the mux one sample after the hue it belongs to. Meanwhile S, V and
the untouched H go straight from the input ports to the output ports. So the
mask applied to the pixel now at the inputs comes from pixels one and two
places earlier in the row. The `ALIGN` parameter chooses between the two
timings:

| | `ALIGN = 0` (default, as drawn) | `ALIGN = 1` (exact variant) |
|---|---|---|
| Comparator input | data register output | stage input |
| S, V, H to outputs | combinational, no delay | 2-sample delay line |
| Output pixel | mask from earlier pixels applied to the current pixel | all of pixel `k-2`, registered |
| Flip-flops | 22 | 82 |
| Input-to-output combinational path | yes | no |

With `ALIGN = 0`, let `k` be the number of samples accepted so far and pixel
`k` be the one on the inputs. The mask is then:

    y(m) = (m >= 2 && H[m-2] > A1) ? H[m-1] : 0        y(m) = 0 for m <= 0
    z(k) = k == 0 ? 0 : (y(k-2) < A2 ? y(k-1) : 0)
    out  = { H[k],  z(k) != 0 ? S[k] : 0,  z(k) != 0 ? V[k] : 1023 }

Inside a region of even colour this gives the same answer as a per-pixel test.
Near region edges and isolated pixels it gives a different answer. On the
256 × 256 test picture, about 3 % of the pixels (1,930) get a different
verdict than the per-pixel rule gives. They lie at region edges and around the
isolated pixels scattered through the picture. The
default keeps this drawn timing, because it is the published circuit: 22
flip-flops and a combinational path from input to output. Set `ALIGN = 1`
when every output pixel must be judged on its own hue. Both timings accept
one pixel per enabled clock.

## Merging with saturation and value (`apply_seg`)

`apply_seg` is combinational:

- `a != 0`: blast pixel, `e = b` (S) and `f = c` (V).
- `a == 0`: background, `e = 0` and `f = 1023`, which is white whatever the
  hue.

H leaves the core unchanged. Blast pixels therefore come back in their
original colour. The source names this block and its ports, and shows the
result on a white ground. The exact rule above is this design's reading of it.

## Interface of the top, `hw_seg`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; clears all registers (output = white) |
| `ce` | in | 1 | sample enable: a pixel is accepted on each rising edge with `ce = 1`; all registers hold when `ce = 0` |
| `gateway_in`, `gateway_in1`, `gateway_in2` | in | 10 | H, S, V of the pixel |
| `gateway_out`, `gateway_out1`, `gateway_out2` | out | 10 | H, S, V of the result |

| Parameter | Default | Meaning |
|---|---|---|
| `A1` | 608 | lower hue threshold, exclusive |
| `A2` | 832 | upper hue threshold, exclusive |
| `ALIGN` | 0 | 0 = timing as drawn; 1 = exact, two-sample latency |

The published model was synthesized for a Spartan-3E with a reported maximum
clock of about 284 MHz. This RTL has no timing constraints of its own.

## Files

| File | Contents |
|---|---|
| `rtl/hw_seg_pkg.sv` | pixel types, threshold codes, comparison enum |
| `rtl/hue_threshold_stage.sv` | one threshold level |
| `rtl/apply_seg.sv` | merge of the mask with S and V |
| `rtl/hw_seg.sv` | top: two stages, merge, optional alignment delay lines |
| `tb/tb_image_pkg.sv` | synthetic smear picture, computed per pixel (nucleus, red cells, background, on-threshold pixels) |
| `tb/tb_apply_seg.sv` | corner and random cases of the merge rule |
| `tb/tb_hue_threshold_stage.sv` | both comparison senses in both timings, random `ce`, reset |
| `tb/tb_hw_seg.sv` | a whole 256 × 256 picture at default parameters, checked every cycle against the formula above |
| `tb/tb_hw_seg_aligned.sv` | a whole 257 × 257 picture with `ALIGN = 1`: exact two-sample latency, per-pixel verdicts, reset in mid-picture |

Each testbench prints one line, `TB_RESULT checks=N failures=M`. The two
end-to-end testbenches also count the cases they exercised: kept pixels,
rejections by each stage, hues exactly on a threshold, stalled cycles and, for
the aligned one, a reset. They count a failure if any of these never occurs.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --top-module tb_hw_seg -Irtl -Itb \
        rtl/hw_seg_pkg.sv rtl/hue_threshold_stage.sv rtl/apply_seg.sv rtl/hw_seg.sv \
        tb/tb_image_pkg.sv tb/tb_hw_seg.sv
    ./obj_dir/Vtb_hw_seg

Substitute `tb_hw_seg_aligned`, `tb_hue_threshold_stage` or `tb_apply_seg`
(with the files it needs) for the other tests. Each one runs in well under a
second. Lint with `verilator --lint-only -Wall -Irtl rtl/hw_seg_pkg.sv
rtl/<module>.sv ...`. The only warnings left are for package constants that a
given module does not use.

To try other thresholds, override `A1` and `A2`. The testbenches hard-code
608 and 832 in their reference models, so change those too.

## Departures and open points

- **Reset** is added. The original has only a clock and a clock enable.
- **The `apply_seg` rule** (white background, S and V kept otherwise) is
  inferred from the result picture. The original's rule inside that block is
  not published.
- **The fixed-point format** (binary point above bit 9) is assumed. Only the
  10-bit width is known.
- **`ALIGN = 1`** is an addition. The default reproduces the drawn timing,
  including the offset of the mask from the pixel described above.
- **The clock wrapper** that the vendor tool generates is left out; `clk` and
  `ce` are brought out directly. At a single sample rate it only passes
  the clock and the enable through.
- **Not in hardware here:** RGB↔HSV conversion, the 7 × 7 median filter,
  framing, and the co-simulation link. These are host-side steps in the
  original flow.
