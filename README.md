# Ringing-adaptive polyphase video scaler

A sharp interpolation filter keeps fine detail when a picture is resized. Next
to a strong edge, though, it overshoots, and the overshoot shows as ringing:
halos in the flat area beside the edge. A soft filter avoids the halos but
blurs everything. This scaler uses both. It finds the pixels where ringing
would be visible, the **ringing area**: flat pixels within a couple of pixels
of a strong edge. It interpolates those pixels with a filter that does not
overshoot (**filter A**), and every other pixel with a sharp filter
(**filter B**), edge pixels included. The result keeps edges crisp without
halos, and no post-processing pass is needed.

The second idea is in the line memory. The horizontal stage splits its line
buffer into four interleaved banks, so the four input pixels an output pixel
needs come out in one clock cycle whatever the scaling ratio is. One unit
therefore does both up-scaling and down-scaling. It computes only the output
pixels that are wanted, so it needs no output FIFO and runs in a single clock
domain.

The design scales by any rational factor L/M per direction (L up, M down,
1..255 each). Its pixels are 8 bits wide. Input lines can be up to 1920
pixels long and frames up to 1080 lines tall.

## Data flow

```
 raster in ──► vertical_scaler ───────────────► horizontal_scaler ──► raster out
               9 line banks, read in parallel    edge_detector
               vertical edges/dilation/XOR       ringing_area_estimator
               position_dda (lines)              parallel_line_memory (4 banks x 2 lines)
               coeff_bank, polyphase_filter      position_dda (pixels)
                                                 coeff_bank, polyphase_filter
```

The vertical stage comes first, so its line store only has to be as wide as
the input picture. Both stages use the same rules: the same edge detector,
ringing map, filters and position arithmetic. One applies them down the
columns and the other along the lines.

## Which pixels are in the ringing area

Along one direction (a line, or a column), with `x[i]` the pixels and the end
pixels repeated past both ends:

1. **Edge map.** `e[i] = |x[i+1] - x[i-1]| > thresh`. `thresh` is the 8-bit
   input `cfg_thresh`.
2. **Dilation.** `d[i] = OR of e[j]` for `|j - i| <= DIL`, with `DIL = 2`.
   Two pixels is how far a 4-tap kernel reaches. Positions outside the line
   count as non-edge.
3. **Ringing map.** `ring[i] = d[i] XOR e[i]`. This is the band around each
   edge, without the edge itself.

An output pixel between input pixels `k` and `k+1` takes its filter from the
nearer of the two: `k` when the phase is below one half, `k+1` otherwise. If
that pixel's ring bit is set, the output uses filter A, otherwise filter B.
The `out_filt` output reports which filter the horizontal stage used.

In the horizontal stage, `edge_detector` decides one edge bit per accepted
pixel. The bit for pixel n-1 is known once pixel n arrives, and the bit for
the last pixel is decided together with it. The bits go into a 1920-bit map
per line slot in `ringing_area_estimator`. That block works out the dilation
and XOR combinationally when the line is read. In the vertical stage, the
edge bits of the lines around the output position are computed from the
pixel window, as described below.

## Filters and coefficients (`scaler_pkg`, `coeff_bank`)

Both filters are 4-tap Keys cubic-convolution kernels:

```
|x| < 1     : (a+2)|x|^3 - (a+3)|x|^2 + 1
1 <= |x| < 2: a|x|^3 - 5a|x|^2 + 8a|x| - 4a
```

* Filter A: `a = 0`. This is a smooth-step interpolator. All its
  coefficients are >= 0, so it never overshoots.
* Filter B: `a = -0.75`. It is sharper than ordinary bicubic (`a = -0.5`) and
  has negative side lobes.

The fractional position is quantised to 64 phases. For phase `p`
(t = p/64), the taps on pixels k-1, k, k+1 and k+2 are `K(1+t)`, `K(t)`,
`K(1-t)` and `K(2-t)`. Each is rounded half up to a signed 12-bit value with
10 fraction bits. Rounding leaves a small residue, which goes onto the tap
nearest the output position (tap 1 if p < 32, else tap 2), so every phase
sums to exactly 1024. The table (2 x 64 x 4 entries) is built at elaboration
from these formulas by `coef_value` in `scaler_pkg`, so it synthesises to a
constant ROM. To change the kernels, edit `KEYS_A_QUARTERS` (a in quarters).

## Output positions (`position_dda`)

Output sample m sits at input position `m*M/L`. Its integer part
`k = floor(m*M/L)` selects the pixels. Its remainder `r = (m*M) mod L`
selects the polyphase phase, and the stored phase is `floor(r*64/L)`. The
walker never multiplies. At the start of a line it splits `M/L` into a
quotient `q` and a remainder step `s`, and for each output it does:

```
r' = r + s;  carry = (r' >= L);  r' -= carry ? L : 0;  k' = k + q + carry
```

Outputs are produced while `k < width`, which gives `ceil(W*L/M)` per line
of W pixels. The first output sits on input pixel 0. The two stages each
have their own walker: the horizontal one over the pixels of a line, the
vertical one over the lines of a frame.

## The parallel line memory (`parallel_line_memory`)

This block makes the single up/down unit possible. It holds two line slots.
Each slot is spread over R = 4 banks:

```
pixel j  ->  bank (j mod 4), word (slot * 480 + j div 4)
```

Any four consecutive pixels `k-1 .. k+2` therefore sit in four different
banks. For each bank b, the reader works out which member of the window falls
in that bank, `j_b = base + ((b - base) mod 4)`, and reads that word. All
four banks are read in the same cycle. One clock later a small mux puts the
four bank outputs back in window order.

Near the line ends some window positions fall outside the line. Position -1
is replaced by pixel 0, and positions at or beyond W by pixel W-1. The
replacement pixel is always inside the same window, so this needs no extra
read. The window is only valid when k lies inside the line, which the
position walker guarantees.

Writing and reading never collide because they always use different slots.
Line j is written into one slot while line j-1 is read from the other, so
reading trails writing by exactly one line. `in_ready` drops only while both
slots hold unread lines. That is the normal state when up-scaling: reading a
line then takes `W*L/M` clocks, longer than the `W` clocks needed to write it.

## The vertical stage (`vertical_scaler`)

Vertical interpolation needs input lines k-1..k+2 for every column.
Classifying the nearest line (k or k+1) needs its vertical edge bits for
±2 lines. Each of those edge bits needs the lines just above and below it.
Together that is a window of 8 lines, `k-3 .. k+4`. The stage keeps 9 line
banks: line y goes into bank `y mod 9`, pixel x into word x. Each cycle it
reads column x from all nine banks at once. Eight of them form the window,
already clamped to the first and last line of the frame. The ninth bank
takes the next input line at the same time.

Per column, the stage computes the vertical edge bits of the window lines,
the dilation and XOR at the nearest line, and the filter choice. It then
reads the coefficients and filters lines k-1..k+2.

Flow control:
* A line is accepted only when the bank it goes into holds no line that is
  still needed: line index ≤ k + 5.
* Output line m starts once lines up to k+4 have arrived, or the whole
  frame has.
* After the frame's last output line, the stage waits for the next frame.

## Interfaces and timing

Top module `adaptive_video_scaler`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_lv`, `cfg_mv` | in | 8 | vertical L (up) and M (down) |
| `cfg_lh`, `cfg_mh` | in | 8 | horizontal L and M |
| `cfg_h` | in | 12 | input lines per frame (1..1080) |
| `cfg_thresh` | in | 8 | edge threshold, both stages |
| `in_valid`, `in_ready`, `in_pix`, `in_last` | in/out/in/in | 1/1/8/1 | input raster, `in_last` on the last pixel of each line |
| `out_valid`, `out_ready`, `out_pix` | out/in/out | 1/1/8 | output raster |
| `out_last`, `out_eof`, `out_filt` | out | 1 | end of line, end of frame, filter used by the horizontal stage (1 = A) |

* Both streams use a valid/ready handshake. A pixel moves on a clock edge
  where valid and ready are both high. An output that is not taken stays
  unchanged (there is an assertion for this).
* When configuration is sampled:
  * `cfg_lv`, `cfg_mv` and `cfg_h` are sampled when the first pixel of a
    frame is offered.
  * The horizontal stage samples `cfg_lh` and `cfg_mh` when it starts each
    output line.
  * Change any of them only between frames, once the last output pixel
    (`out_eof`) has left.
* All lines of a frame must have the same width, which is taken from the
  first line. A line that reaches 1920 pixels is closed there.
* Throughput: within an output line, the horizontal stage delivers one pixel
  per clock while `out_ready` is high. A whole frame takes about
  max(input pixels, output pixels) clocks. Measured at the default sizes:
  * 720x480 to 1920x1080: 2,079,012 clocks for 2,073,600 output pixels.
  * 1920x1080 to 1280x720: 2,081,372 clocks for 2,073,600 input pixels.
* Latency, horizontal stage: the first output pixel of a line comes 3 clocks
  after the line's read starts. Reading starts once the whole input line is
  stored.
* Latency, vertical stage: 4 register stages from column read to output.

The sub-blocks have the same handshakes. Their ports and timing are described
at the top of each file in `rtl/`.

## Size

At the defaults (`MAX_W = 1920`, `MAX_H = 1080`) the line storage is:

* Vertical stage: 9 banks of 1920 x 8 bits (138,240 bits).
* Horizontal stage: 4 banks of 960 x 8 bits (30,720 bits), plus 2 x 1920
  edge bits.

There are about 480 flip-flops of control and pipeline state. Each stage has
four 8 x 12-bit multipliers.

Parameters:
* `MAX_W` and `MAX_H`: the largest input.
* `DIL`: the dilation radius. It also sets the vertical window.
* `PB`: phase bits of the coefficient table.
* `R`: taps and banks of the horizontal line memory.

The kernels are 4-tap, so `R` must stay 4. `PIX_W`, `COEF_W` and `COEF_FRAC`
are in `scaler_pkg`.

## What is the concept, and what is this design's choice

These parts follow the published concept:
* Two complementary filters chosen per pixel.
* Classification by edge detection, then binary dilation, then XOR with the
  edge map.
* Polyphase interpolation at positions `m*M/L` with phase `(m*M) mod L`.
* A horizontal line memory of R = 4 parallel banks, read at a fixed distance
  behind writing. This gives one up/down unit without output FIFOs.

These are choices made here, where the concept leaves the details open:
* Both kernels (Keys a = 0 and a = -0.75) and the coefficient format.
* The 64-phase quantisation.
* The central-difference edge detector with a programmable threshold.
* One-dimensional classification per direction with a 1 x 5 structuring
  element, instead of a 2-D edge map.
* Choosing the filter from the nearest input pixel.
* Bank mapping `j mod 4` and the two-slot ping-pong.
* The whole vertical stage: the concept shows results scaled in both
  directions but only describes the horizontal datapath.
* Frame/line handshakes and edge replication at picture borders.

Two effects of these choices to be aware of:
* The ringing test is separable. A pixel near a vertical edge is treated as
  a ringing area only by the horizontal stage, and one near a horizontal edge
  only by the vertical stage.
* Filter A with a = 0 blurs only slightly, but it is not a band-limited
  interpolator.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a cycle-count watchdog. The reference
model is in `tb/scaler_ref_pkg.sv`. It uses floating-point kernels, and the
2-D reference applies the line model to every column and then to every
resulting line.

| testbench | what it checks |
|---|---|
| `tb_edge_detector` | edge bits of random lines, one decision per pixel, thresholds 0..39 |
| `tb_ringing_area_estimator` | edge and ring bits of random maps in both slots, read while the other slot is written |
| `tb_coeff_bank` | all 512 coefficients against the float kernels, unit sum, A non-negative, B with negative lobes, hold on `en` low |
| `tb_position_dda` | k, r, phase and last for 67 L/M/width sets, output count `ceil(W*L/M)`, one output per clock |
| `tb_parallel_line_memory` | every 4-pixel window, including end replication, while the other slot is written; 1-clock latency |
| `tb_polyphase_filter` | rounding and clipping on random windows, hold on stall |
| `tb_horizontal_scaler` | whole lines at 1920-pixel size: 2.5x, 720→1920, 1920→1280, 3/7, a 1-pixel line, a 1925-pixel input closed at 1920; back-pressure; one pixel per clock; end-of-frame pass-through |
| `tb_vertical_scaler` | small frames up and down, 1-line frame, back-pressure and input gaps, end-of-line/frame flags, one pixel per clock |
| `tb_adaptive_video_scaler` | the full design at default sizes: small stressed frames, then 256x256 and 512x512 at 2.5x both ways, 720x480→1920x1080 and 1920x1080→1280x720; every pixel and flag compared (5 million checks); counts up/down in each direction, both filters in each stage, input, output and inter-stage stalls, and ratio changes |

All of them pass. The full-size run simulates about 6.2 million clocks, which takes roughly 12 seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_adaptive_video_scaler \
    rtl/scaler_pkg.sv tb/scaler_ref_pkg.sv tb/tb_adaptive_video_scaler.sv
./obj_dir/Vtb_adaptive_video_scaler
```

For another block, replace the testbench name. `-y` finds the modules that
it uses.
