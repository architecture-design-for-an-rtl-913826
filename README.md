# Two-tap LMS adaptive equalizer with time-shared multipliers

A channel with inter-symbol interference smears each transmitted symbol over
several received samples. An adaptive equalizer is an FIR filter whose weights
are trained, while known symbols are sent, so that its output matches those
symbols again. This design trains the weights with the least-mean-squares
(LMS) rule. For each received sample x(n) and desired sample d(n):

    y(n)      = sum_k  w_k * x(n-k)                 (filter)
    e(n)      = d(n) - y(n)                          (error)
    w_k(n+1)  = w_k(n) + mu * e(n) * x(n-k)          (weight update)

Built directly, every tap needs two multipliers: one for w_k*x(n-k) and one
for the update term. There is also one common multiplier for mu*e(n). Here
each tap has **one** multiplier, used twice per sample. A 2:1 multiplexer in
front of it selects the weight for the filter pass and the scaled error
mu*e(n) for the update pass. This roughly halves the multiplier count. The
price is two clock cycles per sample.

The default build has two taps (`NTAPS = 2`) and 18-bit words. The tap count
is a parameter. The eleven-tap case has been simulated.

## Update rules

The weight update can also use only the sign of the data, of the error, or of
both. These sign rules trade convergence speed for less hardware. A 2-bit
`mode` input selects the rule for each sample (`lms_pkg::lms_mode_e`):

| mode | rule       | update term                   | multiplier use in the update pass |
|------|------------|-------------------------------|-----------------------------------|
| 0    | LMS        | mu * e(n) * x(n-k)            | common: mu*e, tap: x*(mu e)       |
| 1    | sign-data  | mu * e(n) * sign(x(n-k))      | common: mu*e, tap: none (+/-)     |
| 2    | sign-error | mu * sign(e(n)) * x(n-k)      | common: none (+/-mu), tap: x*(+/-mu) |
| 3    | sign-sign  | mu * sign(e(n)) * sign(x(n-k))| none: the weight moves by +/-mu   |

`sign(v)` is the sign bit: +1 for v >= 0 and -1 for v < 0. Mode bit 0 means
"use sign(x)" and bit 1 means "use sign(e)". The multiplexed datapath and the
four rules follow the original architecture. Choosing the rule at run time, per
sample, is this design's own choice. Use mode 0 if your system only needs LMS.
A synthesis tool will then remove the bypass paths.

## The two-pass schedule

`lms_ctrl` sequences every sample through two passes. `sel` is the multiplexer
control bit: 1 selects filtering and 0 selects the weight update, as in the
original architecture.

```
cycle        t (accept)    t+1 FILTER           t+2 UPDATE              t+3
in_ready     1             0                    1 (next sample may enter)
sel          -             1: prod_k = x_k*w_k  0: prod_k = x_k*mu_e
             x, d, mu,     y, e, mu*e formed    w_k <= w_k + delta_k    w_out new
             mode latched  and registered       out_valid, y_out, e_out
```

* **Accept (edge at the end of cycle t).** The sample enters the delay line.
  Its `d_in`, `mu` and `mode` are latched with it, so they can change on every
  sample.
* **Filter pass (t+1).** Every tap multiplies its stored sample by its weight.
  `error_unit` adds the products and subtracts the sum from d(n). `mu_unit`
  scales the error. All three results are registered at the end of the cycle.
  This pass is the longest combinational path: tap multiplier, adder chain,
  subtractor, then the mu multiplier.
* **Update pass (t+2).** Each tap multiplies its sample by the registered
  mu*e and writes the new weight at the end of the cycle. `y_out` and `e_out`
  are presented with a one-cycle `out_valid` pulse. `in_ready` is high again,
  so the next sample is taken at the same edge that writes the weights. There
  is no hazard: the update uses the old sample, and the shift loads the new one.

A continuous stream therefore runs at one sample every two cycles. Latency from
acceptance to `out_valid` is two cycles. `w_out` shows the updated weights one
cycle after `out_valid`. Nothing stalls the output: `out_valid` has no ready
signal.

The weight update uses the error of the same sample. There is no adaptation
delay, unlike delayed-LMS pipelines.

## Number format

All signals are 18-bit two's complement with 14 fraction bits (Q4.14, range
[-8, 8), 1.0 = 16384). The 18-bit word length comes from the original design.
The split into integer and fraction bits is this design's choice. To change
it, set the `W` and `FRAC` parameters.

Arithmetic rules:

* Each product is shifted right by `FRAC` bits, rounding toward minus
  infinity, and saturated to W bits.
* The output sum y is formed at full width and saturated once.
* e and each new weight also saturate, so the weights never wrap around.
* Weights keep a fixed W-bit length; they do not grow with each iteration.
* `mu` should be positive. Typical values are 0.002 to 0.1, which is 33 to
  1638 in Q4.14. Sign-error and sign-sign steps move a weight by exactly mu per
  sample, so they need a much smaller mu than LMS.

The original architecture mentions an 18-bit floating-point format, but its
field layout is not specified. This design stays with fixed point throughout.

## Modules

| file | role |
|------|------|
| `rtl/lms_pkg.sv` | mode enum, mode bit positions, default sizes |
| `rtl/lms_tap.sv` | one tap: sample register, weight register, operand multiplexer, multiplier, saturating weight adder, sign-data bypass |
| `rtl/error_unit.sv` | adder of the tap products, error subtractor |
| `rtl/mu_unit.sv` | the common mu multiplier, and +/-mu for the sign-error rules |
| `rtl/lms_ctrl.sv` | IDLE / FILTER / UPDATE state machine, handshake, assertions on the pass order |
| `rtl/lms_equalizer.sv` | top: the tap chain, the error and mu units, the pipeline registers |

With the default parameters, coarse synthesis gives 3 multipliers (2 taps plus
1 common) and 167 flip-flops.

### Top-level ports (`lms_equalizer`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, clears samples and weights |
| `in_valid` / `in_ready` | in / out | 1 | the sample is taken when both are high |
| `x_in` | in | W | received sample x(n) |
| `d_in` | in | W | desired (training) sample d(n) |
| `mu` | in | W | step size for this sample |
| `mode` | in | 2 | update rule, see the table above |
| `out_valid` | out | 1 | `y_out`, `e_out` valid (one-cycle pulse) |
| `y_out`, `e_out` | out | W | equalizer output and error |
| `w_out` | out | W x NTAPS | current tap weights |

Parameters: `NTAPS` (default 2), `W` (18), `FRAC` (14).

## Verification

Each testbench checks its results against values computed independently. Most
use `tb/lms_ref_pkg.sv`, a bit-true reference model written in 64-bit
integers.

| testbench | what it checks |
|-----------|----------------|
| `tb_lms_tap` | both multiplexer settings, the weight update with and without sign(x), sample shifting, saturation |
| `tb_error_unit` | y and e for 2 and 11 taps, including saturation |
| `tb_mu_unit` | mu*e and mu*sign(e), including zero and full-scale errors |
| `tb_lms_ctrl` | pass order cycle by cycle under random traffic; 200 back-to-back samples in 399 cycles |
| `tb_lms_equalizer` | default size (2 taps) end to end; see below |
| `tb_equalizer_11tap` | `NTAPS = 11`, learning curves averaged over 50 runs per rule |

`tb_lms_equalizer` does the following:

* It trains the equalizer on a channel x(n) = s(n) + 0.4 s(n-1) + noise, with
  +/-0.5 symbols and d(n) = s(n).
* It runs one training segment from reset for each rule. In each segment it
  checks that the error energy falls more than fourfold. The weights settle
  near [0.98, -0.36].
* It then switches the rule at random on every sample, at full streaming rate.
* Finally it drives full-scale random data so that y, e and the weights
  saturate.
* Throughout, every output and weight is compared bit for bit with the
  reference model. The 2-cycle latency and the 2-cycles-per-sample rate are
  checked.
* It counts filter passes, update passes, samples accepted during an update
  pass, each rule, rule changes and saturation events. Each must occur at
  least once.

`tb_equalizer_11tap` uses the classic raised-cosine channel
h = [0.2197, 1, 0.2197] with desired delay 7. Over 50 runs, the mean squared
error falls from about 0.5 to these values:

| rule | mu | final MSE |
|------|----|-----------|
| LMS | 0.075 | 4e-4 |
| sign-data | 0.02 | 2e-4 |
| sign-error | 0.01 | 6e-3 |
| sign-sign | 0.002 | 1e-3 |

The trained weights are symmetric around the centre tap, which is about 1.11.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lms_equalizer \
    -y rtl -y tb +libext+.sv -Irtl rtl/lms_pkg.sv tb/lms_ref_pkg.sv \
    tb/tb_lms_equalizer.sv -Mdir obj
./obj/Vtb_lms_equalizer
```

Replace the testbench name to run another one. Each testbench ends by printing
`TB_RESULT checks=N failures=M`. All of them finish in well under a second.

## Departures and limits

* **Training only.** The desired sample d(n) is an input. No decision device
  (slicer) and no decision-directed or blind mode are included. To keep
  adapting after training, feed a slicer's output back as `d_in`.
* **Decision-feedback equalizer.** A DFE (a feed-forward filter plus a feedback
  filter on past decisions) is often discussed alongside this structure. It is
  not built: its sizes and decision device are not specified.
* **Fixed point instead of floating point**, as described under Number format.
* **Choices made in this design**, where the original architecture gives no
  detail:
  * the sign(0) = +1 convention;
  * the saturation and floor rounding;
  * the reset values;
  * the valid/ready handshake;
  * the run-time mode input;
  * latching `mu` and `mode` with each sample.
* **Timing.** The filter pass is a single long combinational path. To reach a
  higher clock rate, add a register between `error_unit` and `mu_unit` and make
  the schedule three passes. The two-pass timing diagram above would change
  accordingly.
