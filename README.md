# Four-tap direct-form FIR filter

An FIR (finite impulse response) filter computes each output as a weighted
sum of the current input sample and a fixed number of earlier ones:

    y(n) = b0*x(n) + b1*x(n-1) + b2*x(n-2) + b3*x(n-3)

This RTL builds that sum directly in hardware, in the direct form. A chain of
registers holds the last three samples. Four constant-coefficient multipliers
weight the current sample and the three held ones. A chain of adders sums the
four products. With no feedback, a single non-zero sample gives an output that
lasts exactly four samples and then returns to zero.

Default configuration:

| quantity            | default               | origin                                 |
|---------------------|-----------------------|----------------------------------------|
| taps `NTAPS`        | 4 (filter order 3)    | filter specification                   |
| input width `DW`    | 8 bits, two's complement | filter specification                |
| output width `OW`   | 16 bits, two's complement | filter specification               |
| coefficients        | b = {3, 1, 2, 1}      | the reference impulse-response example |
| coefficient width `CW` | 8 bits, signed     | this design's choice                   |

## Data path

```
 x_in ──┬──► [z^-1] ──┬──► [z^-1] ──┬──► [z^-1] ──┐
        │             │             │             │
      (×b0)         (×b1)         (×b2)         (×b3)
        │             │             │             │
        └──────────► (+) ────────► (+) ────────► (+) ──► y_out
                   mac cell 1    mac cell 2    mac cell 3
```

* `fir_delay_line`: the z^-1 registers. At each rising clock edge `x_in`
  moves into the first register and every register passes its value on, so
  `taps[k]` holds x(n-1-k).
* `fir_coeff_mult`: one multiplier with a constant coefficient (a parameter).
  It keeps the full DW+CW-bit signed product. Because the coefficient is
  constant, synthesis can turn it into shifts and adds.
* `fir_mac_cell`: multiply-accumulate cell. It computes
  `acc_out = acc_in + b_i * x(n-i)`. Tap 0 is a bare multiplier. Taps 1 to 3
  are MAC cells chained through their `acc` ports, so the running sum moves
  from tap to tap and leaves the last cell as `y_out`.
* `fir_filter`: the top. It wires the blocks together for any `NTAPS >= 2`.
* `fir_pkg`: the default widths, sample and result types, and the default
  coefficient array.

## Timing

* One sample per clock. There is no clock enable and no valid handshake:
  every rising edge shifts the delay line.
* Zero latency. Nothing is registered after the multipliers, so `y_out` is a
  combinational function of `x_in` and the three held samples. Present x(n)
  at `x_in` and y(n) appears on `y_out` in the same cycle. x(n) then enters
  the delay line at the next rising edge.
* Critical path: one multiplier followed by NTAPS-1 adders. It gets longer as
  taps are added. Register `y_out` outside the filter (or pipeline the adder
  chain) if the clock rate needs it. Either change adds latency.
* Reset: `rst` is synchronous and active high. It clears the delay line, so
  the filter starts as if every earlier input had been zero. The output is not
  held at zero during reset: it still shows b0 * `x_in`.

## Number format and overflow

Samples, coefficients and results are two's complement. Each product is
formed exactly at DW+CW bits, then sign-extended (or truncated) to OW bits.
The adders work at OW bits and wrap modulo 2^OW. With the default
coefficients the largest possible |y| is 7 × 128 = 896, so the 16-bit
output never overflows. A coefficient set whose sum of magnitudes times 128
exceeds 32767 can wrap. The filter does not saturate and does not flag this.

## Reference behaviour

With b = {3, 1, 2, 1} and the input 2, 4, 6, 4, 2 (zero before and after),
the filter gives:

| n    | 0 | 1  | 2  | 3  | 4  | 5  | 6 | 7 | 8 |
|------|---|----|----|----|----|----|---|---|---|
| x(n) | 2 | 4  | 6  | 4  | 2  | 0  | 0 | 0 | 0 |
| y(n) | 6 | 14 | 26 | 28 | 26 | 16 | 8 | 2 | 0 |

A unit impulse returns the coefficients themselves: 3, 1, 2, 1, then 0.

## Using and changing it

```
fir_filter u_fir (.clk, .rst, .x_in, .y_out);              // defaults
fir_filter #(.NTAPS(6),
             .COEFFS('{8'sd127, -8'sd128, 8'sd100, -8'sd1, 8'sd64, 8'sd127}))
  u_fir6 (.clk, .rst, .x_in, .y_out);
```

`COEFFS` is an unpacked array of `NTAPS` signed `CW`-bit values, with b0
first. When you change `NTAPS` you must also give `COEFFS` with the same
length. Widths `DW`, `CW` and `OW` are independent parameters.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.
Each has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_fir_coeff_mult`  | every 8-bit input against coefficients 3, -5 and -128 |
| `tb_fir_mac_cell`    | 5000 random samples and partial sums, plus corner cases that wrap |
| `tb_fir_delay_line`  | reset, then random shifting against a software history, then a mid-stream reset |
| `tb_fir_filter`      | the top at its default parameters: the table above, the unit impulse, 2000 random signed samples against a convolution model, a mid-stream reset, and the extreme inputs. It checks y in the same cycle as x, which confirms zero latency. It counts delay-line shifts, resets, negative inputs and full four-term sums, and fails if any count is zero. |
| `tb_fir_filter_ntap` | a 6-tap instance with large coefficients, where 16-bit wrap-around happens and is counted |

To run one with Verilator:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_fir_filter \
    -y rtl -y tb +libext+.sv rtl/fir_pkg.sv tb/tb_fir_filter.sv
./obj_dir/Vtb_fir_filter
```

All testbenches pass. Each one was also run against a copy of its module with
one deliberate bug, and it failed:

| bug introduced                       | failed checks       |
|--------------------------------------|---------------------|
| sample treated as unsigned           | 384 of 768          |
| adder subtracts the product          | 9966 of 10006       |
| a delay register skips a stage       | 248 of 756          |
| tap 0 uses b1 instead of b0          | 2012 of 2042        |

## Where this departs from, or goes beyond, the specification

* The filter is described as a "moving average" filter. A true moving average
  would use equal coefficients. The reference example uses the unequal set
  {3, 1, 2, 1}, and that set is the default here. Any other set, including
  an equal one, is a parameter change.
* Written out term by term, the filter equation names the third term
  b2·x(n-1). The summation form of the same equation, and the reference
  example, both use x(n-2), and so does this RTL.
* The reported implementation used 21 bonded I/O pins. This interface needs
  26: 8 in, 16 out, clock and reset. The reported build must have brought out
  fewer signals, but how it did so is not known.
* These are this design's own choices: the coefficient width, the reset, the
  wrap-around on overflow, and the absence of a clock enable or output
  register.
* Nothing here is specific to an FPGA vendor. The target device is
  programmable logic and is not modelled.
