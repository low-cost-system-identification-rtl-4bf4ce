# First-order system identifier on an FPGA

This RTL identifies an unknown first-order system from its input and output. The system is
stimulated with a step. Both its input `u` and its output `y` are sampled by two 8-bit serial
A/D converters. A recursive least-squares (RLS) estimator in the FPGA fits the discrete model

    y(k) = b·y(k-1) + a·u(k-1)        i.e.   H(z) = a / (z - b)

with one update every 10 ms. A small microcontroller reads the two coefficients over an 8-bit
parallel bus. It shows them on a display and sends them to a PC over RS-232.

The design follows a low-cost system-identification tool. That tool was built around a
Spartan-3 starter board, a Cypress PSoC microcontroller and an analog front-end board. Its
reference test is the plant `H(s) = 10/(s+10)`. At a 10 ms sample time the exact discrete
model of that plant is `0.09516/(z - 0.9048)`. Because of 8-bit quantisation, the tool itself
reported values near `0.1016/(z - 0.8906)`. This RTL, run against a simulated copy of that
plant, reads `0.1094/(z - 0.8906)`.

## Signal chain

```
            10 kHz tick                10 kHz pairs        100 Hz pairs
sample_timer ─────────► serial_a2d ───────────────► downsample ──────────► rls_estimator
                        │  ▲ convst_n, a2d_clk                               │ b, a (Q8.24)
                        │  └ data_in1 (y), data_in2 (u)                      ▼
                        │ latest y, u samples                         coeff_convert ×2
                        ▼                                                    │ 8-bit codes
                      uc_interface ◄─────────────────────────────────────────┘
                        ▲▼ enable_in, read_in, databus_i/o/oe   (to the microcontroller)
```

Channel 1 carries the system output `y` and channel 2 the system input `u`. The microcontroller
can read four registers:

| channel | content                              | format                         |
|---------|--------------------------------------|--------------------------------|
| 0       | denominator coefficient `b`          | unsigned, value = code/128     |
| 1       | numerator coefficient `a`            | unsigned, value = code/128     |
| 2       | latest system-output sample `y`      | two's complement, value = code/128 |
| 3       | latest system-input sample `u`       | two's complement, value = code/128 |
| 4..127  | reads 0                              |                                |

The two RS-232 lines of the microcontroller only pass through the FPGA
(`tx_in → tx_out`, `rx_in → rx_out`) on their way to the board's level translator.

## The estimator

`rls_estimator` holds the following state:

- the 2×2 covariance matrix `P`, in four registers `P11, P12, P21, P22`;
- the estimate `θ = [b, a]`;
- the regressor `φ = [y(k-1), u(k-1)]`.

When a new sample pair `(y(k), u(k))` arrives, it runs one RLS step:

```
r_num = P·φ                       (rls_gains_mults)
r_den = 1 + φ'·P·φ                (rls_gains_mults)
e     = y(k) − φ'·θ               (rls_gains_mults)
recip = 1 / r_den                 (rls_recip, bit-serial)
k     = r_num · recip
θ     ← θ + k·e                   (rls_theta_update)
P     ← P − k·r_num'              (rls_p_update)
φ     ← [y(k), u(k)]
```

- **Arithmetic.** All of it is signed fixed point, Q8.24 in 32 bits (`sysid_pkg`). The range is
  ±128 and the step is 2⁻²⁴. A product keeps 64 bits and is shifted back by 24, truncating toward
  −∞. An A/D code `c` enters as the value `c/128`.
- **Divider.** The only division is `1/r_den`. It is a restoring divider that produces one
  quotient bit per clock. Its result saturates if `r_den` is not positive, which cannot happen
  while `P` stays positive definite.
- **Latency.** A step takes 51 clocks from the accepted strobe to `upd_valid`. The sample
  period is 500,000 clocks, so speed is not an issue. A strobe that arrives while a step is
  running is ignored.
- **Symmetric P.** The cross term `k1·r_num2` is formed once and subtracted from both `P12`
  and `P21`. A symmetric `P` therefore stays exactly symmetric.
- **Reset.** Reset loads `θ = [1, 1]`, the starting value of the original tool's coefficient
  traces, and `P = P_INIT·I` with `P_INIT = 16`. The first sample pair after reset only fills
  the regressor.
- **No forgetting factor.** Once the transient is over, `P` shrinks and the estimate freezes.
  To measure again, pulse reset. The microcontroller does this by holding reset low until it
  applies the step.

### Accuracy

The estimate is biased by the 8-bit sampling, not by the fixed-point arithmetic. The block
testbench runs a floating-point RLS alongside the hardware on the same codes. The two agree
to better than 0.01 at every step, and in practice to about 10⁻⁵.

After a step of 0.75 of full scale, `y` settles at 96 codes. The small steps of `y` near the
top of its rise are then quantised coarsely. This pulls `b` down from 0.905 to about 0.89 and
`a` up from 0.095 to about 0.11. The original tool showed the same effect. A random-input
excitation recovers `b = 0.906`, `a = 0.096`. Larger steps, or a richer stimulus than a single
step, give better estimates.

### Output codes

`coeff_convert` turns a coefficient into `round(θ·128)`, clipped to 0..255. This is the
microcontroller's `value = code × 2⁻⁷` convention. The initial value 1.0 reads as 128. Values
outside 0..1.992 clip and raise `coeff_sat`; with a step stimulus this happens only briefly,
during the first updates.

## A/D interface (`serial_a2d`)

Both converters share `convst_n` and `a2d_clk`. Each `start` pulse from the 10 kHz timer runs
this sequence:

1. `convst_n` is held low for 51 clocks, which starts the conversion.
2. The interface waits 250 clocks (5 µs) for the conversion to finish.
3. It toggles `a2d_clk` every 51 clocks, about 490 kHz. On each of the 8 high-to-low
   transitions it shifts in one bit per channel, MSB first.

Inverting the MSB turns the converters' offset binary (0x80 at the 1.65 V bias) into two's
complement. The whole conversion takes 1117 clocks (22.3 µs) of the 5000-clock sample period.
`valid` pulses once per conversion.

`downsample` passes every 100th pair: the first after reset, then the 101st, the 201st, and so
on. This turns the 10 kHz acquisition rate into the 10 ms model sample time.

## Microcontroller bus (`uc_interface`)

Reading one register takes two bus cycles. The bus is brought out as `databus_i`, `databus_o`
and `databus_oe`; put a tri-state pad buffer on it at board level.

1. **Write the channel number.** Drive `read_in = 0` and `enable_in = 1` with
   `0x80 + channel` on the bus. Bits 6..0 are stored in the select register; bit 7 is ignored.
2. **Read the register.** Drive `read_in = 1` and `enable_in = 1`. The FPGA drives the selected
   register while both are high.

The read path uses the live register inputs, and the select register has no reset. This lets
the microcontroller read the registers while it holds the FPGA in reset. Before the test
starts it reads the initial 1.0 coefficients in exactly that state.

## Where this RTL departs from, or adds to, the original tool

The original tool's estimator was generated from a block diagram. Only its block names, its
signal names and its overall dataflow are known. The following are this design's own choices:

- the RLS equations as written above;
- the Q8.24 arithmetic;
- `P_INIT = 16`;
- the absence of a forgetting factor;
- the bit-serial reciprocal;
- the `θ = [1, 1]` reset value, read from the tool's result plots.

Other additions and departures:

- **Rates.** The original gives both a 10 kHz sampling rate and a 10 ms model sample time. Here
  both hold: the A/D runs at 10 kHz and a 100:1 decimator feeds the estimator.
- **Clock enable.** The 10 kHz conversion start comes from a free-running counter (`sample_timer`).
- **A/D outputs.** `a2d_clk` comes from a register. The sample registers load once, at the end
  of a complete read.
- **Bus interface.** The unused data-request bit and the unused registered input copies are
  left out.
- **Status output.** `coeff_sat` is an extra output.

The analog parts are not RTL and are not included: input amplifiers, 5th-order Bessel
anti-aliasing filters, the A/D converters themselves, the stimulus D/A and its output filter,
the power-up reset, the microcontroller and its firmware, the display and the RS-232 level
translator. `tb/ad7823_model.sv` is a behavioural converter model, for simulation only.

## Files

| file | contents |
|------|----------|
| `rtl/sysid_pkg.sv` | fixed-point types, `fmul`, sample conversion |
| `rtl/system_id_top.sv` | top level; parameters `CLK_HZ`, `SAMPLE_HZ`, `DECIM`, `P_INIT` |
| `rtl/sample_timer.sv` | 10 kHz conversion start |
| `rtl/serial_a2d.sv` | dual serial A/D interface |
| `rtl/downsample.sv` | 100:1 decimator |
| `rtl/rls_estimator.sv` | RLS state, sequencing |
| `rtl/rls_gains_mults.sv`, `rls_p_update.sv`, `rls_theta_update.sv` | RLS step arithmetic (combinational) |
| `rtl/rls_recip.sv` | bit-serial reciprocal |
| `rtl/coeff_convert.sv` | coefficient to 8-bit code |
| `rtl/uc_interface.sv` | microcontroller register interface |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_system_id_updown.sv` | whole design through step up, step down and reset |
| `tb/ad7823_model.sv` | behavioural serial A/D model |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_system_id_top rtl/sysid_pkg.sv tb/tb_system_id_top.sv
./obj_dir/Vtb_system_id_top
```

`tb_system_id_top` runs the whole design at its default parameters, about 1.5 minutes of
simulation. It:

- simulates the plant `10/(s+10)` analytically;
- copies the microcontroller's test sequence: reset low with the stimulus low for 50 ms, then
  reset released and step raised together, then all four channels read every 10 ms for 1 s;
- repeats the whole run after a second reset.

It checks that:

- the identified coefficients lie within 4/128 of the exact discretisation;
- both runs give identical results;
- the coefficients read 1.0 during reset;
- the sample channels follow the plant;
- every mechanism occurred at least once: conversions, decimation, updates, restarts, select
  writes, reads of each channel, and an unused-channel read.

`tb_system_id_updown` (about 1 minute) follows the full test cycle of the microcontroller
firmware. The step rises, and 1 s later falls while the estimator keeps running; then reset
returns. The estimate stays within 4/128 of the plant after both edges. The falling edge adds
data and here improves the result to `0.1016/(z − 0.8984)`.

The block testbenches run in seconds. `tb_rls_estimator` checks the estimator against a
floating-point RLS, under random input and under a step, and checks the 51-clock latency.
