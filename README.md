# Quaternion LMS adaptive filter in SystemVerilog

This is a pipelined, parameterised adaptive FIR filter whose samples, weights and error are
**quaternions**. A quaternion has four real components: one real part and three imaginary
parts (i, j, k). It holds a 3-D vector or a rotation as a single number, so one filter can predict or
denoise a 3-D trajectory or an orientation sequence without splitting it into separately
filtered channels. For each input sample the filter computes

```
y(n)     = sum_{l=1..L} conj(w_l(n)) * x(n-l+1)        filter output
e(n)     = d(n) - y(n)                                  error against the desired signal
w_l(n+1) = w_l(n) + mu * x(n-l+1) * conj(e(n))          quaternion LMS weight update
```

Here `*` is the non-commutative quaternion (Hamilton) product, `conj` negates the three
imaginary parts, `mu` is a real step size, and all weights start at zero.

The default configuration has L = 8 taps. Numbers are 15-bit fixed point (sign, 2 integer bits,
12 fraction bits, written s2.12 below). A new sample is accepted every 22 clock cycles, which is
220 ns at 100 MHz.

## Architecture

```
            x_in,d_in                                      +-----------+
  in_valid ---->[ data_in ]--x--> TAP_1 --x--> TAP_2 --> ... --> TAP_L --> x_last
                    |  d            |             |                 |
                    |               +----prod-----+------ ... ------+
                    |                          |
                    |                    [ sum_tree ]  (ceil(log2 L) levels)
                    |                          | y
                    +-------------------> [ error ] ---- conj(e) ----> every tap
                                               |
                                         [ data_out ] --> y_out, e_out, out_valid
                 [ control ]  --> en_x, en_w, sel_prod, sel_mult (to every tap)
```

The filter has these blocks:

- **Taps (`qlms_tap`).** Each tap holds a sample register (`qlms_x_tap`) and a weight register
  (`qlms_w_tap`). The sample registers of all taps form the delay line. Every tap also has
  **one** quaternion multiplier (`qlms_quat_product`), used twice per sample period.
- **Operand multiplexer (`qlms_prod_mux`).** In the first half of the period the tap's
  multiplier computes `conj(w) * x`, the tap's share of y. In the second half it computes
  `x * conj(e)`, the weight increment. The select signal is `sel_prod`.
- **Weight update.** The increment is scaled by `mu` (`qlms_miu_prod`) and added to the weight
  (`qlms_quat_sum`). The result is written back on `en_w`.
- **Adder tree (`qlms_sum_tree`).** A pipelined binary tree of two-input quaternion adders
  sums the L products, one register per level. When a level has an odd number of terms, the
  leftover term goes through a one-cycle delay register, so that every path has the same
  latency for any L. The sum grows by one bit per level and is exact.
- **Error unit (`qlms_error`).** It subtracts y from d and saturates the result. It keeps e and
  `conj(e)` steady for the whole update phase. `conj(e)` is broadcast to all taps.
- **Controller (`qlms_control`).** It is a counter plus two small ROMs, described below.
- **Interfaces (`qlms_data_in`, `qlms_data_out`).** These connect the filter to the outside
  world: a one-sample input buffer, and output registers with a valid pulse.

`qlms_top` wires these blocks together. `qlms_pkg` holds the shared constants, the enum types
of the select signals, and the helper functions.

## The quaternion multiplier and its shared multipliers

A direct quaternion product needs 16 real multiplications. `qlms_quat_product` uses a
factorisation that needs only 8. For `p = x * y`, with components numbered 1 (real) to 4 (k):

```
T1 = x1 y1    T2 = x4 y3    T3 = x2 y4    T4 = x3 y2
H(a) = [ (a1+a2)+(a3+a4), (a1+a2)-(a3+a4), (a1-a2)+(a3-a4), (a1-a2)-(a3-a4) ]
[T5..T8] = (H(x)/2) .* (H(y)/2)                 element-wise
u = H([T5..T8])
p1 = 2T1 - u1    p2 = -2T2 + u2    p3 = -2T3 + u3    p4 = -2T4 + u4
```

This is exactly the Hamilton product. The testbenches check it against a textbook
16-multiplication reference.

`H` is a two-level add/subtract butterfly (`qlms_addsub`, 8 adders, one register per level).
The block uses it three times: on x, on y and on the products.

The multiplications T1..T4 and T5..T8 are independent and ready one cycle apart. So both sets
run on the **same four multipliers** (`qlms_mult_system`, which has an input register and an
output register):

- When `sel_mult = 0`, a multiplexer in front of each multiplier passes the raw components,
  delayed by one cycle to line them up.
- When `sel_mult = 1`, it passes the butterfly outputs.
- T1..T4 wait in a register while T5..T8 go through the output butterfly. A last stage then
  combines the two.

Sharing the multipliers costs no extra cycles. Each tap therefore uses 4 hardware multipliers,
and the whole filter uses 4·L.

Operand timing: hold `in1`/`in2` steady from cycle c0 to c0+3, drive `sel_mult` = 0 at c0+1
and 1 at c0+2, and the product is valid in cycle c0+7 (latency 7).

The factors ½ in front of the multipliers and the factor 2 on T1..T4 are not shifts that lose
bits. They move the binary point:

- Multiplier operands are W+2 = 17 bits wide. This fits one 18-bit DSP multiplier input.
- The products keep 2·FRAC+2 fraction bits.
- `2·Ti` is `Ti` shifted left by 3 so that it lines up with the other terms.

Only the final result is narrowed to the data format.

## One sample period

The controller's counter runs from 0 to COUNT and wraps, where

```
S        = ceil(log2 L)                adder-tree levels
Delay_L  = FIXED_DELAY + S             FIXED_DELAY = 16
COUNT    = Delay_L + 2                 period = COUNT + 1 = 19 + S cycles
```

A registered compare of the counter with `Delay_L` gives `en_w` in cycle `Delay_L + 1`. One
more register gives `en_x` in cycle `Delay_L + 2`, the last cycle of the period. Two ROMs
addressed by the counter produce `sel_prod` and `sel_mult`. Their outputs are registered, so
ROM address a holds the value for cycle a+1.

With PH2 = S + 8, the first cycle of the update phase, one period for L = 8 (S = 3, 22 cycles)
looks like this:

| counter | event |
|---|---|
| 0 | new sample in tap 1, delay line shifted; `sel_prod` = output phase |
| 2, 3 | `sel_mult` = 1: multipliers compute T5..T8 of `conj(w)*x` |
| 7 | tap products valid |
| 8 .. 10 | adder tree (3 levels); y valid at cycle 10 |
| 11 (PH2) | e = d − y registered; `sel_prod` switches to the update phase; `data_out` captures y and e |
| 12 | `out_valid`, `y_out`, `e_out` |
| 13, 14 | `sel_mult` = 1 for the `x*conj(e)` product |
| 18 | update product valid |
| 19 | mu × product registered |
| 20 (Delay_L + 1) | `w + mu x conj(e)` ready: `en_w` loads the weights |
| 21 (Delay_L + 2) | `en_x`: the next sample enters the delay line (`in_taken`) |

The update must be ready exactly at `en_w`. This forces FIXED_DELAY = 2·7 + 2 = 16: two
products, the error register and the mu register, less one. The controller rejects any other
value at elaboration.

Changing L changes only S. The period is 19 + ceil(log2 L) cycles: 20 for L = 2, 25 for L = 64.

## Numbers: format, rounding, saturation

- **Format.** Every quaternion component is two's-complement fixed point with `INT_BITS`
  integer bits and `FRAC_BITS` fraction bits. Its width is W = 1 + INT_BITS + FRAC_BITS, which
  is 15 for s2.12, so the representable range is [−4, 4).
- **Layout.** A quaternion is a packed `[3:0][W-1:0]` array. Element 0 is the real part;
  elements 1, 2 and 3 are i, j and k.
- **Step size.** `mu` uses the same W-bit format. The default configuration can represent a
  step size up to just under 4, in steps of 2^-12.
- **Rounding.** Wherever a wider result is narrowed (product output, mu scaling, error, weight
  sum, y_out), the extra fraction bits are truncated, which rounds toward minus infinity.
- **Saturation.** After truncation the value saturates to the W-bit range. The conjugate also
  saturates: the negation of −4 is +4 − 2^-12.
- **Adder tree.** The tree is exact, W + S bits wide. Only `y_out` is saturated to W bits.
  The error is computed from the full-width sum.

## Interface (`qlms_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all samples and weights) |
| `mu` | in | W | step size, read during every update phase |
| `in_valid` | in | 1 | one-cycle strobe: `x_in`, `d_in` hold a new sample |
| `x_in`, `d_in` | in | 4·W | input sample and desired value |
| `in_taken` | out | 1 | the pending sample was moved into the filter (once per period) |
| `overrun` | out | 1 | pulse: a pending sample was overwritten before it was taken |
| `underrun` | out | 1 | pulse: the filter took a sample but none new was written (the old one is reused) |
| `y_out`, `e_out` | out | 4·W | y(n) and e(n) |
| `out_valid` | out | 1 | pulse: `y_out`/`e_out` updated |
| `x_last` | out | 4·W | oldest sample in the delay line, x(n−L+1) |
| `w_taps` | out | L·4·W | current weights, tap 1 at index 0 |

The filter runs at a fixed rate and never stalls. A source that writes one sample per period,
at any point in it, sees every sample taken exactly once.

The sample taken at the end of period k produces its `y`/`e` on `out_valid` S + 10 cycles
later, in period k+1. The first `out_valid` after reset reports the all-zero initial state.

Parameters: `L` (8), `INT_BITS` (2), `FRAC_BITS` (12), `FIXED_DELAY` (16, fixed by the
pipeline).

## Where this design departs from the original architecture

- **Control ROM contents.** The published ROM tables have the right shape: `sel_prod` is
  zeros then ones, and `sel_mult` is 0,1,1 then zeros, twice. Their lengths, however, do not
  fit one counter period. The ROM contents here come from this pipeline's latencies (see the
  table above). The counter length, compare value, `en_w`/`en_x` cycles and 22-cycle period
  are the original ones.
- **Gains in the multiplier.** The architecture has gains of ½ before the multipliers and 2
  after them. Here they are implemented as binary-point moves with wider operands, not as
  shifts that discard bits.
- **Rounding and overflow.** These are not specified by the original architecture.
  Truncation toward minus infinity with saturation is this design's choice.
- **Interfaces.** The input buffer, the valid pulses, the overrun/underrun flags, and
  bringing out `x_last`/`w_taps` are this design's own. The original only names the input
  and output interface blocks.
- **Latencies.** The pipeline depths of the individual blocks are this design's own:
  butterfly 2, multipliers 2, product 7, adder 1 per level. They were chosen so that the
  original fixed delay of 16 cycles comes out exactly.
- **Target.** The original targets a Xilinx FPGA with DSP slices. This RTL is generic. The
  multipliers are plain signed `*`, which a synthesis tool may map onto DSP blocks.
- **Adder reuse.** A variant that also shares the add/subtract butterflies was discussed for
  the original and set aside there. It is not built here.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against values computed
independently in `qlms_ref_pkg`, which provides:

- a 16-multiplication Hamilton product;
- a bit-exact fixed-point model of the filter;
- a double-precision model.

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks | checks |
|---|---|---|
| `tb_qlms_addsub` | butterfly sums, 2-cycle latency | 299 |
| `tb_qlms_mult_system` | signed products incl. extremes, latency | 299 |
| `tb_qlms_quat_product` | product vs Hamilton reference, saturation, latency 7 | 401 |
| `tb_qlms_quat_conj` | conjugate, saturating negation | 200 |
| `tb_qlms_x_tap`, `tb_qlms_w_tap` | enable and reset behaviour | 302 each |
| `tb_qlms_prod_mux` | operand selection in both phases | 200 |
| `tb_qlms_miu_prod` | mu scaling, truncation, saturation | 300 |
| `tb_qlms_quat_sum` | saturating and widening sums | 601 |
| `tb_qlms_sum_tree` | L = 8 and L = 6 (delay padding), latency | 596 |
| `tb_qlms_error` | capture on `en_x`, hold in update phase, conjugate | 801 |
| `tb_qlms_data_in` | take/write ordering, overrun, underrun | 1601 |
| `tb_qlms_data_out` | capture point, valid pulse, saturation | 1555 |
| `tb_qlms_control` | every cycle of the schedule for L = 8, 5, 1, 64 | 32000 |
| `tb_qlms_tap` | one tap through full periods | 178 |
| `tb_qlms_top` | whole filter at L = 6 | 22096 |
| `tb_qlms_top_full` | whole filter at the default parameters | 22900 |
| `tb_qlms_predict` | 3-D trajectory prediction, L = 8, s2.12 | 3005 |
| `tb_qlms_denoise` | denoising of a rotating vector, L = 8, s4.10 and s4.12 | 6013 |
| `tb_qlms_predict_lengths` | prediction with L = 16, 32 and 64 taps | 9015 |
| `tb_qlms_predict_formats` | prediction at s2.8, s2.10, s2.12 and s2.14 | 12019 |

**End-to-end tests.** `tb_qlms_top` and `tb_qlms_top_full` share a harness
(`tb_qlms_harness`) that identifies an unknown quaternion FIR system. It checks the following
against the fixed-point model, bit for bit:

- every y, e, weight and `x_last` value;
- the 22-cycle period and the S + 10 cycle latency.

It also counts the events the design has:

- both select switches;
- weight loads;
- an overrun;
- underruns;
- a step-size change in mid-run;
- saturation of the error.

Any event that never happens counts as a failure. The test also requires the error power to
fall by at least a factor of ten.

**Workload tests.** The data is synthetic, generated inside the testbench.

- `tb_qlms_predict` predicts a 3-D point rotated by a slowly varying quaternion, 10 samples
  ahead, with noise at 20 dB SNR. It uses the default configuration with mu = 0.05. Over the
  last quarter, the error power is 1.8 % of the signal power. The fixed-point output stays
  within 0.56 % RMS of a double-precision filter.
- `tb_qlms_denoise` cleans the same kind of signal with noise at 10 dB SNR. The noisy input
  needs four integer bits, so it runs at s4.12 and s4.10 with mu = 0.1. The output is about 18
  (s4.12) and 15 (s4.10) times closer to the clean signal in power than the noisy input. The
  fixed-point versus double-precision difference is 0.35 % and 1.34 %.
- `tb_qlms_predict_lengths` runs the prediction task with 16, 32 and 64 taps. The step size
  must shrink as the filter grows: mu = 0.05 diverges at 64 taps, so that filter uses 0.02.
  The fixed-point versus double-precision difference grows with the length: 0.65 %, 1.04 % and
  1.99 %.
- `tb_qlms_predict_formats` runs the same task at 8, 10, 12 and 14 fraction bits. The
  fixed-point versus double-precision difference falls by about a factor of four for every
  two extra bits: 8.7 %, 2.2 %, 0.57 % and 0.14 %.

**Accuracy.** Every narrowing step truncates toward minus infinity, so each one adds a small
negative bias. Rounding to nearest would lower these figures at the cost of an adder per
narrowing point. It is not implemented.

For each module, a copy with one deliberate bug was also run against its testbench, and the
testbench failed every time.

### Running a test with Verilator

```
verilator --binary --timing -Irtl -Itb rtl/qlms_pkg.sv tb/qlms_ref_pkg.sv \
    tb/tb_qlms_top_full.sv --top-module tb_qlms_top_full -Mdir obj_full
./obj_full/Vtb_qlms_top_full
```

Replace `tb_qlms_top_full` with any testbench name. The other files are found through
`-Irtl -Itb`. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/qlms_pkg.sv rtl/qlms_top.sv --top-module qlms_top`.

## Changing the design

- **Filter length.** Set `L`. The period, the ROM contents and the adder tree follow
  automatically. Non-power-of-two lengths are padded with delay registers.
- **Word length.** Set `INT_BITS`/`FRAC_BITS`. All internal widths derive from them. The
  multiplier operand width is W+2.
- **Block latencies.** Changing the latency of a block means updating the constants in
  `qlms_pkg` (`PROD_LATENCY`, `UPDATE_LATENCY`, `ERROR_LATENCY`). `FIXED_DELAY` must then equal
  2·`PROD_LATENCY` + `ERROR_LATENCY` + `UPDATE_LATENCY` − 1. The controller checks this at
  elaboration.
