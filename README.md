# float16 pixel pipeline with polynomial-based division, log, exp and square root

This design runs floating-point arithmetic on a live 1080p60 video stream at
one pixel per clock. Every 8-bit RGB pixel is converted to a 16-bit float
(1 sign bit, 5 exponent bits, 10 fraction bits). Four composite functions of
the pixel are then computed side by side:

| function | formula | uses |
|---|---|---|
| f1 | max(R,1)·max(G,1) / (max(R,1)+max(B,1)) | multiply, add, **divide** |
| f2 | c0 · log2(max(R,1)) | **log2**, multiply |
| f3 | 2^(c1·R) | multiply, **2^x** |
| f4 | sqrt(c2·R) | multiply, **square root** |

The selected result is turned back into an 8-bit grey level. A host on an SPI
link can:
- change c0, c1 and c2 while video runs;
- choose which operation is shown;
- read back any pixel, both as the original 24-bit value and as the 16-bit
  float result.

The idea that makes this cheap is that the four hard operations are built the
same way. Each one reduces its argument to a small fixed interval by working
on the exponent and the significand separately. It then evaluates a
piecewise polynomial of degree d on n equal segments of that interval. The
polynomial unit is fully pipelined: one multiply-add per stage, with the
segment chosen by a comparator chain. Because of that, every operator accepts
a new operand on every clock, and its latency depends only on d:

| operator | latency (clocks) |
|---|---|
| fix2float, float2fix, multiply | 1 |
| add | 6 |
| log2, sqrt | d+3 |
| divide, 2^x | d+4 |
| f1 | d+10 |
| f2, f3 | d+5 |
| f4 | d+4 |

Each function exists in four variants: degree 2 or 3, and 4 or 8 segments.
All 16 variants run in parallel in the top level, and the SPI operation code
picks one.

## The float16 format

| field | bits |
|---|---|
| sign | [15] |
| exponent | [14:10], bias 15 |
| fraction | [9:0], with a hidden leading one |

- Value = (−1)^s · 2^(e−15) · 1.f.
- There are no subnormals: exponent 0 means zero, whatever the fraction.
- Exponent 31 means infinity (fraction 0) or NaN (fraction ≠ 0).
- Operators that create a NaN produce `7E00`.
- Every operator truncates; none rounds to nearest. For example,
  85.3 → `5554`, 44.435 → `518D` and 0.0277 → `2717`.
- Overflow gives infinity. Results below 2^−14 flush to zero.

`EW` and `MW` are parameters of every module, so other widths can be built.
Only the 5/10 format has been tested.

## The piecewise polynomial approximator (`poly_approx`)

This block does the real work, so it is described in detail.

**Fixed-point format.** Arguments and results are signed fixed point:
24 bits with 16 fraction bits (`POLY_W`, `POLY_F` in `fplib_pkg`).

**Segments and coefficients.** The interval [x_lo, x_hi] is cut into `NSEG`
equal segments. A comparator chain finds the last segment whose lower bound
x has reached; this is a priority encoder. The segment number then addresses
a table of `D+1` coefficients C(k,0..D). The segment count therefore changes
only the table size and the comparator count, never the latency.

**Pipeline.** The polynomial is evaluated in Horner form,
`((C0·x + C1)·x + C2)·x + …`, with one multiply-add per pipeline stage:
- Stage 0 picks the segment and loads C(k,0).
- Stages 1..D each multiply by x and add the next coefficient.

The segment number and x travel down the pipeline with the partial sum. Each
stage therefore reads its own operand's coefficient row, even though a new x
enters every clock. Latency is D+1.

**Intervals and coefficient sources.** Each function has its own interval
and coefficients:

| function | interval | d = 2, n = 4 coefficients | other d / n |
|---|---|---|---|
| 1/(1+x) | [0,1] | published table | fitted at elaboration |
| log2(1+x) | [0,1] | published table | fitted at elaboration |
| 2^x | [−1,1] | published table | fitted at elaboration |
| sqrt(x) | [1,4] | published table | fitted at elaboration |

- The published tables are 5-digit values, kept in `fplib_pkg::pub_coef`.
  Their worst-case error is about 3·10⁻³. Most of this comes from the
  coefficients themselves, not from the fixed-point arithmetic.
- For other degree and segment counts, the coefficients are computed at
  elaboration by `fplib_pkg::fit_coef`. It interpolates the exact function
  at the d+1 Chebyshev nodes of each segment:
  x_r = mid + half·cos(π(2r+1)/(2d+2)).
  With d=3, n=8 the error stays below 10⁻³, the bound the tests apply.
- All tables are `localparam` arrays computed by constant functions, so no
  data files are read.

## How each operator uses the polynomial

**Divide (`fp_div`).**
- a/b = 1.ma · (1/1.mb) · 2^(ea−eb).
- The polynomial gives r = 1/(1.mb), which lies in (0.5, 1].
- The product 1.ma·2r lies in [1,4), and the exponent path starts from
  ea − eb + bias − 1.
- A product of 2 or more is shifted down and the exponent is incremented.
- A final stage handles the special cases:

| input | result |
|---|---|
| x/0 | ±inf |
| 0/0, inf/inf | NaN |
| x/inf | 0 |
| overflow | inf |
| underflow | 0 |

**log2 (`fp_log2`).**
- log2(x) = (e − bias) + log2(1.m).
- The unbiased exponent is shifted into the integer part of a fixed-point
  number, and the polynomial value is added.
- The sum is converted back to float by a fix2float stage.
- Special cases: negative inputs give NaN, 0 gives −inf, +inf gives +inf.

**2^x (`fp_exp2`).**
- x is converted to fixed point and split into an integer part (the new
  exponent) and a signed fraction in (−1, 1).
- The polynomial on [−1,1] gives 2^fraction, so a negative x needs no
  separate path.
- One normalising step brings the significand back into [1,2).
- Overflow gives +inf and underflow gives 0. The result is never negative.

**Square root (`fp_sqrt`).**
- If the unbiased exponent is odd, the significand is doubled and the
  exponent made even.
- The polynomial on [1,4) gives the new significand, and the halved exponent
  is the new exponent.
- Negative inputs give NaN.

## Conversions, adder, multiplier

**`fix2float`.** A leading-one detector on the magnitude gives the exponent.
The bits below the leading one, truncated, give the fraction.

**`float2fix`.** Shifts the significand left or right by the exponent,
relative to the fixed-point fraction width. Results outside the range, and
infinities, saturate. NaN gives 0.

**`fp_add`.** Six stages:
1. Order the operands by magnitude.
2. Align the smaller one, keeping three guard bits.
3. Add or subtract.
4. Find the leading one.
5. Normalise.
6. Handle special cases and pack.

Neither shift (alignment in stage 2, normalisation in stage 5) is a barrel
shifter. Every constant shift of the operand is formed in parallel, and the
exponent difference or leading-zero count selects one of them.

**`fp_mult`.** A single stage: XOR of the signs, sum of the exponents,
11×11-bit product, one normalising shift, and special cases.

**`fp_max`.** Combinational max(x, 1.0), used by f1 and f2 so that a black
channel cannot produce log(0) or 0/0.

## Composite functions (`f1_ratio`, `f2_log`, `f3_exp`, `f4_sqrt`)

- **f1** runs the product and the sum in parallel. The product (1 clock) is
  delayed 5 clocks so it meets the sum (6 clocks) at the divider.
- **f2** registers the max (1 clock) and takes log2. It then multiplies by c0,
  which is delayed alongside the pixel.
- **f3** multiplies c1·R, then takes 2^x.
- **f4** multiplies c2·R, then takes the square root.

The logarithm and exponential are base 2. To get another base, the host
scales the coefficient: for example, it sends c0·ln 2 for a natural
logarithm.

## Video top level (`fplib_top_video`)

**Datapath.** The datapath runs on the pixel clock:
- `vid_pData_i` is {R[23:16], G[15:8], B[7:0]}.
- Three `fix2float` units convert the channels.
- f1..f4 run for every (degree, segments) pair in `DEG` × `SEGS`
  (default {2,3} × {4,8}).
- A registered multiplexer picks the operation.
- `float2fix` converts the result, which is clamped to 0..255 and driven onto
  all three output channels.

**Sync and latency.** HSYNC, VSYNC and DE go through a delay line of the same
length. Every result is padded to one common latency LAT_F, so switching
operations never shifts the picture against its syncs:
- LAT_F = max(max(DEG)+10, `EXT_LAT`) = 15 clocks by default.
- f1 at degree 3 needs 13 clocks.
- The external operations are allowed `EXT_LAT` = 15.

Pixel and sync latency is LAT_F+4 = 19 clocks.

**Operation codes** (one byte):

| op | meaning |
|---|---|
| bits [1:0] | f1, f2, f3, f4 |
| bit [2] | degree `DEG[0]` / `DEG[1]` |
| bit [3] | segments `SEGS[0]` / `SEGS[1]` |
| 16..19 | external results `ext_g_i[0..3]` |
| other | black |

**External results.** Ports `ext_rgb_o` and `ext_coef_o` give the float
pixels and coefficients to an outside block, for example the same four
functions built from another floating-point core generator. That block must
return its results on `ext_g_i` exactly `EXT_LAT` clocks after the pixel
appeared on `ext_rgb_o`. If an external operation is faster, it must pad
itself to `EXT_LAT`.

**Pixel read-back (`read_pixel`).**
- Column and row counters run on the input stream and, separately, on the
  delayed result stream.
- The column counts active pixels while DE is high.
- The row advances at the end of each active line and restarts at VSYNC.
- When the counters match the requested (row, col), the 24-bit input pixel
  and the float16 result are captured. Each is taken from its own stream, so
  no latency needs to be known.

**Not included.** HDMI receive and transmit, the clock generator and board
I/O are not part of this RTL. The top expects a parallel RGB stream with
HSYNC/VSYNC/DE, as HDMI receiver cores deliver it.

## SPI protocol (`spi_interface`)

**Mode.** Mode 0, MSB first. SCK, SS_N and MOSI are synchronised into the
pixel clock, so SCK must be slower than clk/4. The tests use SCK periods
of 6 to 14 pixel clocks, which is about 10 to 25 MHz at a 148.5 MHz pixel
clock.

**Frames.** Each frame (SS_N low) is a command byte followed by data bytes,
most significant byte first:

| command | data | effect |
|---|---|---|
| `01` | 2 bytes | c0 |
| `02` | 2 bytes | c1 |
| `03` | 2 bytes | c2 |
| `04` | 1 byte | operation |
| `05` | 4 bytes | row (2 bytes), column (2 bytes) to capture |
| `06` | 5 dummy bytes | MISO returns R, G, B, float[15:8], float[7:0] of the captured pixel |

**Register updates.** A register changes only after its last byte arrives,
so the datapath never sees half of a new value. After reset, c0 = c1 = c2 =
1.0, op = 0 (f1, d=2, n=4) and the position is (0,0).

## Accuracy and verification

Each module has a self-checking testbench in `tb/`. Each one compares against
real-number arithmetic computed in the testbench (`tb_fp_pkg`), checks the
exact latency, and prints `TB_RESULT checks=… failures=…`.

Tolerances (relative error unless stated):

| block | tolerance |
|---|---|
| multiply, conversions, max | bit-exact against a truncating reference |
| add | 2⁻⁹ (guard bits beyond three are dropped before subtraction) |
| divide, log2, sqrt | 3·10⁻³ |
| 2^x | 5·10⁻³ |
| polynomial unit | 4·10⁻³ absolute with the published d=2, n=4 tables; 10⁻³ with the fitted d=3, n=8 tables |
| f1..f4 | about 6·10⁻³ |

The transcendental units and f1..f4 are tested at both d=2, n=4 and d=3, n=8.

**End-to-end test.** `tb_fplib_top_video` streams small random frames. It
drives the SPI link like a host, changing coefficients and pixel position.
Each of the 20 operation codes is used for one frame. It checks:
- every output pixel against the exact function;
- the 19-clock latency and the sync alignment;
- the read-back values.

It also counts max(x,1) clamps, saturation at 255 and at 0, and read-backs,
and it fails if any of them never happens.

**Full-frame test.** `tb_fplib_top_video_1080p` runs one complete 1920×1080
frame in the standard 2200×1125 raster at default parameters. It checks
every pixel of f1, the read-back of pixel (123, 456), and that the frame
takes exactly 2,475,000 clocks (60 frames/s at 148.5 MHz).

**Not verified:** timing closure at 148.5 MHz, resource use, and HDMI.

## Where this design departs from or adds to the original description

- **Original description followed:** the float16 format, the operator set and
  the structure of each operator, the published d=2, n=4 coefficient tables
  and intervals, the latencies in the table above, the 16 variants, the
  parallel functions selected by an operation register, and SPI control of
  c0..c2, operation and pixel position.
- **Additions and choices made here:**
  - the fixed-point width inside the polynomial unit;
  - the fitted coefficients for d=3 and n=8;
  - the exact special-value rules;
  - padding all functions to a common latency;
  - the operation-code layout;
  - grey-level output with saturation;
  - the channel order;
  - the SPI command bytes and read frame;
  - reset values;
  - the two-stream pixel counters.
- **f1 pairing.** f1 pairs R with G in the product and R with B in the sum.
  A block diagram of the original can be read the other way. The formula
  here is the one that agrees with the published read-back example: input
  (210, 211, 213) gives 104.75, and the published example reads 104.5.
- **Not included.** The four comparison operations built with an external
  core generator are not included; only their ports are. Board peripherals
  (LEDs, switches, seven-segment display) are not included either.

## Simulating

Each testbench is a top-level module. With Verilator 5:

    verilator --binary --timing -y rtl -y tb rtl/fplib_pkg.sv tb/tb_fp_pkg.sv \
        tb/tb_fp_div.sv --top-module tb_fp_div -o sim
    ./obj_dir/sim

Replace `tb_fp_div` with any file in `tb/`. Every testbench, including the
full 1080p frame, builds and runs in well under a minute.

**Changing the design.**
- The polynomial degree and segment count of any operator or function are the
  `D`/`NSEG` parameters. New tables are fitted automatically.
- The set of variants in the top level is `DEG`/`SEGS`.
- The float width is `EW`/`MW`.
- The SPI reset value of the coefficients is `C_RESET`.

## Files

| file | contents |
|---|---|
| `rtl/fplib_pkg.sv` | format constants, function intervals, coefficient tables and fitting |
| `rtl/poly_approx.sv` | piecewise polynomial unit |
| `rtl/fix2float.sv`, `rtl/float2fix.sv` | conversions |
| `rtl/fp_add.sv`, `rtl/fp_mult.sv`, `rtl/fp_max.sv` | basic operators |
| `rtl/fp_div.sv`, `rtl/fp_log2.sv`, `rtl/fp_exp2.sv`, `rtl/fp_sqrt.sv` | polynomial-based operators |
| `rtl/f1_ratio.sv` … `rtl/f4_sqrt.sv` | pixel functions |
| `rtl/spi_interface.sv`, `rtl/read_pixel.sv`, `rtl/pixel_position.sv` | host access |
| `rtl/pipe_delay.sv` | register delay line |
| `rtl/fplib_top_video.sv` | video top level |
| `tb/tb_fp_pkg.sv` | float16 ↔ real helpers for the testbenches |
| `tb/tb_*.sv` | one testbench per module, plus the full-frame test |
