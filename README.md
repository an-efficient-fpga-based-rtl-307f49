# Square-root MMSE detector for 4x4 MIMO, without matrix inversion

This is synthesizable SystemVerilog for a fully pipelined linear MMSE detector for a
4-transmit, 4-receive antenna MIMO link. For every channel instance (one OFDM subcarrier: a
4x4 complex channel matrix `H`, the noise level `sqrt(N0)` and a received vector `y`) it
produces the MMSE weight matrix

    W = (H^* H + N0 I)^-1 H^*

and the equalised vector `y_hat = W y`. A new instance is taken every 8 clocks, so at
115.2 MHz it keeps up with 802.11n: 52 subcarriers every 3.6 us OFDM symbol, or 14.4 M
instances/s. The result appears a fixed 348 clocks after the instance went in.

The architecture follows a published FPGA design: square-root MMSE with a dynamically scaled
modified Gram-Schmidt QR and aggressive multiplier time sharing. The word lengths, the
pipeline timing, the square-root and divider cores and the interfaces are this
implementation's own. The section "Where this departs from the original design" lists the
differences.

## The idea: get W from a QR decomposition

A direct implementation squares `H`, adds `N0 I` and inverts the result. In fixed point that
is numerically poor. Instead, stack `H` on top of a scaled identity to form the 8x4
*compound matrix* and QR-decompose it:

    A = [ H          ]  =  [ Q1 ] R          (Q1: 4x4, Q2: 4x4, R: 4x4 upper triangular)
        [ sqrt(N0) I ]     [ Q2 ]

The lower half gives `sqrt(N0) I = Q2 R`, so `R^-1 = Q2 / sqrt(N0)`. Since
`H^*H + N0 I = A^*A = R^*R` and `H^* = R^* Q1^*`,

    W = R^-1 R^-* R^* Q1^* = (Q2 / sqrt(N0)) Q1^*.

No inversion is needed, and `R` itself is never used. Only `Q` and one reciprocal,
`1/sqrt(N0)`, matter. `Q2` is upper triangular as well, because `R^-1` is.

## Dynamic scaling

The QR is a modified Gram-Schmidt. For column `i = 1..4`:

1. Rescale every column still in play by a power of two. A column is doubled while its
   largest `|Re|` or `|Im|` is below `2^L` and halved while it is above `2^U`.
2. Set `u_i = v_i / ||v_i||`.
3. Update `v_j := v_j - (u_i^* v_j) u_i` for every `j > i`.

Step 1 is what makes 16 bits enough. Scaling a column by any constant changes `R` but not
`Q`, and `R` is not needed, so the scale factors can be dropped. Without step 1, each
orthogonalisation shrinks the remaining columns, and the later ones lose their significant
bits. `dyn_scale` finds the column maximum during the 8 clocks the column streams in. It
then applies the single shift that the doubling/halving loop would have produced. Here
`L = 11` and `U = 12` on 16-bit data. That leaves room for an updated column, whose entries
can grow up to `||v|| <= 4 * 2^U`. A scaler sits on each of the four input columns and after
every update unit.

## Time sharing: everything is an 8-clock frame

The compound matrix has 8 rows. Every unit therefore receives a column as 8 elements on 8
consecutive clocks, element 0 flagged by `sof`, and works on it with a few multipliers reused
each clock:

| unit | work per column | real multipliers |
|---|---|---|
| `norm_sq` | `sum |v_k|^2` | 2 |
| `mgs_stage` | `u_k = v_k * (1/||v||)` | 2 |
| `proj_update` | `r = sum conj(u_k) v_k`, then `v_k - r u_k` | 6 (two complex) |
| `mgs_stage1` (first step only) | norm, `u_1`, and all three updates | 2 + 2 + 9 |
| `weight_detect` | `Q2/sqrt(N0)`, `Q2n Q1^*`, `W y`, one phase each | 2, 13, 6 |

Every complex product uses the 3-multiplication form (`cmul3` in `mmse_pkg`). The whole
detector has 64 real multipliers: 13 in step 1, 16, 10 and 4 in steps 2-4, and 21 in
`weight_detect`. The square root and the reciprocal use none.

Every unit takes a new column every 8 clocks. The whole pipeline therefore takes a new
instance every 8 clocks, with no FIFO and no stall. Every latency is a constant (see
`mmse_pkg`):

| path | clocks |
|---|---|
| scaler (`LAT_SCALE`) | 9 |
| column start to `1/||v_i||` available (`LAT_R` = norm 8 + sqrt 18 + reciprocal 35 + register 1) | 62 |
| update unit (`LAT_PROJ`) | 9 |
| first Gram-Schmidt step, column in to updated columns out (`STAGE1_P` = 78 + 3 pad) | 81 |
| each later step (`STAGE_P`) | 81 |
| instance accepted to `u_4` (`T_U4` + 1) | 316 |
| `weight_detect`: capture 8 + three phases of 8 (`LAT_WDET`) | 32 |
| **total (`LATENCY`)** | **348** |

The column sequence through the four stages is
`v1 | v2(1) v3(1) v4(1) | v3(2) v4(2) | v4(3)`, where `(k)` marks a column after `k` updates.
`u_1`, `u_2` and `u_3` leave their stages earlier than `u_4`, by `T_U4 - t_u(i)` clocks
(243, 162 and 81 with the defaults). Delay lines line all four up, so that
`weight_detect` receives row `k` of the whole `Q` on clock `k`. `y` is delayed by `T_U4`
to meet them.

## Sharing multipliers in the first step

A generic step (`mgs_stage`) spends one complex multiplier per remaining column on
`r_j = u^* v_j` and a second one on `r_j u`. In the first step the lower half of `A` is
still a scaled identity, and that leaves most of those multipliers idle:

* `v_1` is non-zero only in rows 0-4, and row 4 (`sqrt(N0)` after scaling) is real. So the
  two norm multipliers are busy in only 5 of the 8 clocks, and `u_1` is zero in rows 5-7
  and real in row 4.
* `v_j` (`j = 2..4`) is zero in row 4, so `r_j` only needs rows 0-3: the `u_1^* v_j`
  multiplier is idle half the time.
* The update `v_j - r_j u_1` changes only rows 0-4; rows 5-7 pass through.

`mgs_stage1` therefore keeps one complex multiplier per column and uses it twice per
frame. Counting clocks from the arrival of `u_1`'s first element: in clocks 0-3 it
accumulates `conj(u_1[k]) v_j[k]`, at clock 3 `r_j` is rounded, and in clocks 4-7 it
forms `r_j u_1[k]` for rows 0-3 from 4-deep buffers of `u_1` and `v_j`. Row 4 needs
`r_j u_1[4]`, two real products because `u_1[4]` is real. These run on the norm
multipliers in their three idle clocks (input slots 5, 6 and 7, one per column). The three
results are then re-serialised: rows 0-3 from the complex multiplier, row 4 from the norm
multipliers, rows 5-7 from a delayed copy of `v_j`. The output starts `S1_EOFF` = 5 clocks
after `u_1` (the earliest clock at which every row is ready) and goes through the usual
scalers.

Compared with a generic first step this removes three complex multipliers (nine real ones
in a 3-multiplier complex product). The arithmetic is the same as in the generic stage,
with the same rounding. For inputs with the structure above, the two give identical bits,
and the testbench compares them bit for bit. The module is wrong for any other input, so
it is only used as stage 1. The slot arithmetic (`S1_PU`, `s1_row4_slot`, `S1_EOFF`)
lives in `mmse_pkg`.

## Exploiting the triangular Q2 in `weight_detect`

`Q2 = sqrt(N0) R^-1` is upper triangular with a real diagonal. Of its 16 entries, 6 are
complex, 4 are real and 6 are zero. This holds exactly in the fixed-point pipeline too:
column `i` of `Q` (counting from 0) is exactly zero below row `NR+i`, and real in row
`NR+i`. `weight_detect` uses this:

* `Q2n = Q2 / sqrt(N0)` needs 6x2 + 4 = 16 real products, 2 per clock: clocks 0-5 scale the
  complex entries 01, 02, 03, 12, 13, 23 and clocks 6 and 7 the diagonal pairs.
* `W[m][n] = sum over i >= m of Q2n[m][i] conj(Q1[n][i])` needs, per column `n` of `W`, 4
  real-by-complex products (2 real multiplications each) and 6 complex products (3 each):
  26, or 13 per clock over 2 clocks. On even clocks the 13 multipliers form `W[0][n]` (1
  real and 3 complex terms) and `W[3][n]` (1 real term), on odd clocks `W[1][n]` (1 real, 2
  complex) and `W[2][n]` (1 real, 1 complex). The tables `RM`, `CM`, `CI` hold the pairing.

Sums are exact, so `W` is bit-identical to the plain 4-term dot products. The entries
below the diagonal and the imaginary parts of the diagonal are never read.

## One square root and one divider for everything

Per instance, five reciprocals are needed: `1/||v_1||`, `1/||v_2(1)||`, `1/||v_3(2)||`,
`1/||v_4(3)||` and `1/sqrt(N0)`. Four square roots are needed too. `sqrt_pipe` and
`recip_pipe` are fully pipelined and accept one operand per clock. A single instance of each
is shared:

* The four `norm_sq` result pulses are multiplexed into the square root. A 3-bit tag goes
  with each operand through both pipelines. When a result emerges, the tag picks which of
  five registers (`recip_q`) it lands in. Each register holds its value for the 8 clocks in
  which the owning stage multiplies its delayed column by it.
* The sharing is collision free by construction. Instances only start on an 8-clock
  boundary (`in_ready` is high one clock in eight). Stage `i`'s norm therefore always reaches
  the square root in slot `(t_stage(i) + 8) mod 8`. The function `pick_pads()` in
  `mmse_pkg` adds pad registers after the first step (`STAGE1_PAD`) and after the others
  (`STAGE_PAD`) until the four slots differ, choosing the smallest added latency. With the
  defaults that is 3 clocks after the first step (78 + 3) and none after the others (81):
  slots 1, 2, 3 and 4.
* `sqrt(N0)` skips the square root and enters the divider directly. The function
  `n0_delay()` in `mmse_pkg` picks its delay (`T_N0` = 279). The result then lands in a slot
  that no norm uses, and becomes visible while `weight_detect` captures that instance.
* Two assertions in `mmse_detector` check that no two requests ever meet.

## Number formats

All values are two's complement; `Fn` means `n` fraction bits.

| quantity | format |
|---|---|
| `H`, `y`, `sqrt(N0)` (inputs) | 16 bit, F12, so range +-8 |
| column data `v` inside the QR | 16 bit integer, scaled per column |
| `Q` (`u_i`) | 14 bit, F12 |
| `||v||` | 18 bit unsigned, F2 |
| reciprocal | 32 bit unsigned, value `2^34 / x`, saturating |
| `Q2/sqrt(N0)` | 20 bit, F12 |
| `W` (output) | 18 bit, F12 |
| `y_hat` (output) | 18 bit, F12 |

The 14-bit `Q` and 16-bit data match the precision the original work found necessary for
64-QAM (within 0.5 dB of floating point). The binary points are this design's choice.
Products are rounded half-up and saturated. A caller with a very small `sqrt(N0)` or a nearly
singular `H` can saturate `W`.

## Interface of `mmse_detector`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (control only) |
| `in_valid` / `in_ready` | in / out | an instance is taken on a clock where both are high; `in_ready` is high every 8th clock |
| `h_i[r][c]` | in | `H`, row `r`, column `c`, `cv_t` (16-bit `re`, `im`) |
| `sqrt_n0_i` | in | `sqrt(N0)`, positive, F12 |
| `y_i[r]` | in | received vector |
| `out_valid` | out | one-clock pulse, `LATENCY` = 348 clocks after the instance was taken |
| `w_o[m][n]` | out | `W`, 4x4 `cw_t`, held until the next result |
| `yhat_o[m]` | out | `y_hat`, `cy_t`, held until the next result |

Results come out in input order. Idle frames (no `in_valid`) are allowed at any point.

## Files

| file | contents |
|---|---|
| `rtl/mmse_pkg.sv` | sizes, formats, latencies, slot choice for `sqrt(N0)`, complex types, round/saturate helpers |
| `rtl/mmse_detector.sv` | top: compound-matrix formatter, input scalers, 4 stages, shared sqrt/reciprocal, alignment, `weight_detect` |
| `rtl/mgs_stage1.sv` | first Gram-Schmidt column step with shared multipliers |
| `rtl/mgs_stage.sv` | one generic Gram-Schmidt column step, steps 2-4 (parameter `NV` = columns left: 2, 1, 0) |
| `rtl/dyn_scale.sv` | power-of-two column scaling |
| `rtl/norm_sq.sv` | `||v||^2` |
| `rtl/proj_update.sv` | `v - (u^* v) u` |
| `rtl/sqrt_pipe.sv` | pipelined integer square root, one bit per stage |
| `rtl/recip_pipe.sv` | pipelined reciprocal `2^34/x` by restoring division |
| `rtl/delay_line.sv` | fixed delay: circular buffer (two-port RAM) plus a reset valid chain |
| `rtl/weight_detect.sv` | `Q2/sqrt(N0)`, `W`, `y_hat`, using the triangular `Q2` |
| `tb/tb_<module>.sv` | one self-checking testbench per module and for the package |
| `tb/tb_qam64_link.sv` | 64-QAM symbol-error workload over random Rayleigh channels |

## Verification

Each testbench computes its expected values independently of the RTL and prints
`TB_RESULT checks=N failures=M`:

* `tb_mmse_detector` runs the whole detector at its default parameters, with 48 random
  instances back to back and three idle frames. Channel gains range from 0.08 to 1.8 and
  SNRs from about 5 to 30 dB. For each instance it computes a floating-point reference
  (Gram-Schmidt QR, `W = Q2 Q1^*/sqrt(N0)`, `y_hat`). It first verifies that the reference
  satisfies `(H^*H + N0 I) W = H^*`. It then compares the RTL's `W` (tolerance 3% of
  `max|W|`) and `y_hat`, checks the 348-clock latency of every instance, and counts the
  mechanisms: scale-up, scale-down, rescaling after an update, back-to-back instances,
  idle frames and first-step row updates made on the shared norm multipliers. A mechanism
  that never happened counts as a failure. Typical result: worst `W` error 0.66% of
  `max|W|`.
* `tb_qam64_link` runs the workload the detector is for: 1000 instances of 64-QAM on four
  streams over random Rayleigh channels (independent CN(0,1) entries) at 24, 28, 32 and
  36 dB receive SNR. It removes the MMSE bias, slices, and counts symbol errors for the
  detector and for floating-point MMSE on the same inputs. The detector must stay within
  25% (plus 3 symbols) of floating point. Typical counts out of 1000 symbols: 281 vs 282,
  133 vs 135, 54 vs 51, 40 vs 39. The decisions differ in about 1% of symbols. These are
  uncoded symbol errors; a coded packet error rate is not simulated.
* `tb_mmse_pkg` checks the rounding, saturation and complex-product helpers against
  independent formulas, and the derived schedule: distinct square-root slots, minimal
  pads, a free divider slot for `sqrt(N0)`, and the first step's output alignment.
* The unit testbenches check `dyn_scale` against a literal doubling/halving loop, `norm_sq`
  against an exact sum, and `sqrt_pipe` and `recip_pipe` bit-exactly, including corner
  values. `delay_line` is checked at depths 2, 3, 9 and 81, and `proj_update` against
  floating point (3 LSB) plus an orthogonality check. The `mgs_stage` testbench plays the
  shared square-root unit. `tb_mgs_stage1` feeds first-step-shaped columns, back to back
  and with gaps, to `mgs_stage1` and to the generic stage side by side and requires
  identical norms, `u_1` and updated columns. The `weight_detect` testbench uses random
  triangular `Q2` frames and drives noise on the entries that must not be read. All of
  them also check latency.

All testbenches pass. Each one was also shown to fail on a deliberately broken copy of its
module.

## Simulating

With Verilator 5, from the repository root, for example the full detector:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_mmse_detector \
        rtl/mmse_pkg.sv rtl/*.sv tb/tb_mmse_detector.sv -Mdir obj_top
    ./obj_top/Vtb_mmse_detector

A unit test only needs the package, its module and the modules that module instantiates:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_proj_update \
        rtl/mmse_pkg.sv rtl/proj_update.sv tb/tb_proj_update.sv -Mdir obj_pu

The end-to-end test finishes in well under a second.

## Changing it

* All widths, binary points and the scaling bounds are in `mmse_pkg`. The derived shifts
  (`U_SHIFT`, `N0_SHIFT`, `W_SHIFT`, `Y_SHIFT`) and all latencies follow from them. So do
  the delay lines and the `sqrt(N0)` slot. Changing `DW` or `RF` alters the square-root
  and divider depths and thus `LATENCY`. The testbenches read `LATENCY` from the package.
* `SCALE_U` must stay at least two bits below the top of `DW`, because an updated column
  may grow by up to `||v||/max` (a factor of 4 for 8 rows).
* `mgs_stage1` needs `2*NR <= GAMMA` (two uses of the complex multiplier per frame) and
  `GAMMA - NR - 1 >= NT - 1` (one idle norm slot per column). Both hold for 4x4 with 8 rows.
* `weight_detect`'s phase schedule (two entries per clock) is written for `NT = NR = 4` and
  `GAMMA = 8`. The rest of the pipeline is written in terms of `NT`, `NR` and `GAMMA`.

## Where this departs from the original design

* **Multiplier counts.** The multiplier-saving measures of the original are built: the
  first-step sharing, 2 and 13 real multipliers for `Q2/sqrt(N0)` and `Q2n Q1^*`, and 6
  real multipliers per update unit. The RTL writes 64 real multiplications, the number
  the original reports. The clock-by-clock schedules are this design's own. Some operands
  are wider than 18 bits (the 33-bit reciprocal, the 20-bit `Q2n`), so on an FPGA with
  18x18 multipliers the hardware count would be higher.
* **Square root and divider.** The original uses vendor library cores. Here they are plain
  bit-serial-per-stage pipelines (`sqrt_pipe`, `recip_pipe`). They account for 53 of the
  348 clocks. Their depth is why the latency differs from the original's 388 clocks.
* **Clock rate.** The original runs at 140 MHz on a Virtex-II. This RTL has not been
  synthesized for an FPGA. Some paths are long: the 4-term complex dot products in
  `weight_detect` and the 35-bit stages of `recip_pipe`, for example. Meeting 115.2 MHz may
  need extra pipeline registers, and the latency constants in `mmse_pkg` would have to
  change with them.
* **Interface.** The original's input and output formats are not known. Here a whole
  instance is presented in parallel, and a result is a parallel `W` plus `y_hat`.
* **Error performance.** The fixed-point behaviour is checked against a floating-point
  reference per instance and by uncoded 64-QAM symbol error counts over Rayleigh
  channels. Coded packet error rates are not simulated.
