# Adaptive interference canceler for periodic signals

This is a small LMS adaptive filter that pulls a periodic signal (for example
a tone or a set of tones) out of broadband interference. It needs no separate
noise reference. The filter's reference is the input itself, delayed by a few
samples. Over that delay the broadband interference stops being correlated
with itself, but a periodic signal does not. An FIR filter fed with the
delayed input therefore learns to predict the periodic part of the current
sample, and cannot predict the interference:

```
 x(n) ──────────────────────────────►(+)──► e(n) = x(n) − y(n)
   │                                   ▲ −        │
   └─► z^-(1+DELAY) ─► FIR w[0..ORDER-1] ─┴──► y(n) │  (to the output)
                          ▲                        │
                          └──── LMS update ◄───────┘
 y(n)     = Σ_l w_l · x(n−1−DELAY−l)
 w_l(n+1) = w_l(n) + 2μ · e(n) · x(n−1−DELAY−l)
```

y(n) is the extracted periodic signal and drives the output DAC. e(n) is
mostly the interference, and it is also made available.

The RTL follows a 1995 FPGA design (a master's thesis on an adaptive
interference canceler on a Xilinx XC4013). The design was limited by logic
capacity. Its key idea is the **queue structure**: one multiplier per tap
would be too large, so two small processors work through the taps two at a
time, sequenced by a slow control clock. The design also has
sign-magnitude arithmetic with 8-bit words, ADC/DAC codes in offset binary, a
28-tap filter, an 8 kHz sample rate, an 8 MHz processor clock and a 500 kHz
control clock. The analog front end, the converters and the test set-up are
not digital logic and are not included. A behavioural ADC model is provided
for simulation.

## Number representation

Two's complement is not used anywhere. Every signed quantity is
**sign-magnitude**: one sign bit (1 = negative) and an unsigned magnitude
(`aic_pkg::sm8_t`, `sm16_t`).

| word | magnitude bits | scale | used for |
|---|---|---|---|
| 8-bit format | 8 | 128 = 1.0 (range about ±2.0) | samples x, weights w, y, e |
| 16-bit format | 16 | 2^14 = 1.0 | products, pair sums, accumulator |

- **ADC code to sign-magnitude** (`u2s_conv`). The analog input sits on a
  half-scale offset, so code 128 is zero. The rule is sign = NOT code[7].
  Codes 128..255 give magnitude code−128. Codes 0..127 give magnitude 128−code,
  so code 0 is −1.0 (magnitude 128).
- **Sign-magnitude to DAC code** (`s2u_conv`) is the inverse, code = 128 + value.
  Values beyond the code range are clamped. A negative zero gives 128.
- **Addition** (`sm_adder`). With equal signs the magnitudes are added.
  With different signs b is subtracted from a; on a borrow the difference is
  two's-complemented back to a magnitude and takes b's sign. A magnitude
  overflow saturates (see below).
- **Multiplication** (`sm_multiplier`) multiplies the magnitudes by
  shift-and-add and sets the sign to the XOR of the operand signs.
- **Rescaling is by truncating right shifts.** A product of two 8-bit-format
  words returns to 8-bit format by `>> 7` (`sm_narrow`). The LMS step size is
  a further `>> MU_SHIFT` (`sm_divisor`), so 2μ = 2^−MU_SHIFT. Truncation
  always rounds the magnitude down, i.e. towards zero.

The consequence to keep in mind: a weight moves only when
|x·e| ≥ 2^(MU_SHIFT)/128 in real units. With MU_SHIFT = 7 (2μ ≈ 0.008) a weight
starting at zero moves only when x and e are both close to full scale. In the
sweep testbench such configurations do not adapt at all. The default
MU_SHIFT = 3 (2μ = 1/8) adapts reliably. Word length, not the algorithm, is
what limits this canceler.

Saturation is this implementation's choice, since the original does not say
what happens on overflow. Adders, the divider, the narrowing shift and the
output converter clamp to the largest magnitude. The top's sticky `ovf`
output records that it happened.

## The queue structure and its timing

```
                   ┌──────────── aic_control_unit ─────────────┐
                   │ COUNTER3: CLOCK2 cycles in a CLOCK1 period │
                   │ COUNTER2: tap/weight pair (pair_sel)       │
                   │ COUNTER1: CLOCK1 periods in an iteration   │
                   └──┬───────────┬────────────┬────────────┬───┘
 adc_data ─► u2s_conv ─► aic_sample_regs ─xa,xb─►│          │
                          (x(n), delay line,     ▼          ▼
                           pair multiplexers)  aic_processor1   aic_processor2
                                         ┌─wa,wb─►(2 mult + adder) (2×(mult → divisor → adder))
                          aic_weight_regs┤         │                ▲     │
                                         └─────────┼────────────────┘     │ new weight pair
                                ▲                  ▼                      │
                                └──────────── aic_accumulator             │
                                  write-back       │ sm_narrow → y        │
                                                   ▼                      │
                                     error adder: e = x − y ──────────────┘
                                                   │
                                  y ─► s2u_conv ─► output register ─► dac_data
```

There is one clock, `clk`, which is the 8 MHz processor clock (CLOCK2). The
500 kHz control clock CLOCK1 is a 1-in-16 clock enable made by COUNTER3. In
each CLOCK1 period a processor gets one tap pair. It has 16 CLOCK2 cycles for
it and needs 12 (the multiplier needs 11), plus one more for the accumulator.
An assertion in the control unit checks that every processor operation ends
inside its period.

A sampling timer requests an iteration every 1000 CLOCK2 cycles (8 kHz).
The iteration starts at the next CLOCK1 boundary, so single periods are 992
or 1008 cycles long, with an average of exactly 1000. One iteration lasts
ORDER + 5 CLOCK1 periods: 33 periods, 528 cycles or 66 µs for ORDER = 28.

| CLOCK1 periods | phase | what happens |
|---|---|---|
| 1 | RD | CS and RD low: read the sample converted in the previous period. At the end it is latched as x(n) and the delay line shifts. |
| 1 | WR | CS and WR low: start the next conversion. Clear the accumulator. |
| ORDER/2 | FILT | Pair p = 0..: PROCESSOR1 forms x_{2p}w_{2p} + x_{2p+1}w_{2p+1}, and the accumulator adds it. |
| 1 | ERR | y = accumulator >> 7. Latch y and e = x − y. |
| ORDER/2 | UPD | Pair p: PROCESSOR2 forms both new weights, which are written back. |
| 1 | OUT | The output register takes the DAC code of y. `sample_done` pulses. |
| 1 | DONE | COUNTER1 returns to zero. |

The read/start order is this implementation's own. The ADC0804-class
converter needs about 100 µs of the 125 µs period, so each iteration
processes the conversion started one period earlier. That adds one sample
of latency. A single extra start (PRIME) after reset makes sure that the
first read finds a finished conversion. The converter's INTR line is not
used.

The weight update uses the same tap vector and the same e as the output
computation of that iteration. Both paths of PROCESSOR2 receive the same e.

## Modules

| file | role |
|---|---|
| `aic_pkg.sv` | sign-magnitude structs and the phase enum |
| `aic_top.sv` | the canceler: wiring, error adder, y/e/output registers |
| `aic_control_unit.sv` | three counters, sampling timer, strobes, ADC control |
| `aic_sample_regs.sv` | x(n) register, delay line of DELAY + ORDER samples, pair multiplexers |
| `aic_weight_regs.sv` | ORDER weights (reset to 0), pair read and write |
| `aic_processor1.sv` | two multipliers and a sign-magnitude adder |
| `aic_accumulator.sv` | 16-bit-format running sum |
| `aic_processor2.sv` | two paths: multiplier → divisor → adder |
| `sm_multiplier.sv` | sequential 8×8 shift-and-add, 11 cycles |
| `sm_adder.sv` | sign-magnitude adder (combinational) |
| `sm_divisor.sv` | divide by 2^SHIFT (truncating shift, saturating) |
| `sm_narrow.sv` | 16-bit format → 8-bit format (`>> 7`) |
| `u2s_conv.sv`, `s2u_conv.sv` | ADC/DAC code conversion |

Each file starts with a comment that gives its interface and cycle timing.

### Top-level ports (`aic_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | CLOCK2 (8 MHz nominal) |
| `rst_n` | in | 1 | asynchronous, active low |
| `adc_data` | in | 8 | converter data, offset binary. It is sampled at the end of the RD period. |
| `adc_cs_n`, `adc_rd_n`, `adc_wr_n` | out | 1 | ADC0804-style bus. A WR pulse starts a conversion. |
| `dac_data` | out | 8 | offset-binary code of y for a DAC in symmetrical offset mode (128 = 0 V) |
| `y_out`, `e_out` | out | 9 | `sm8_t` y and e of the last iteration |
| `sample_done` | out | 1 | one-cycle pulse when `dac_data` is updated |
| `ovf` | out | 1 | sticky: some stage saturated since reset |

### Parameters (`aic_top`)

| parameter | default | meaning |
|---|---|---|
| `ORDER` | 28 | number of taps (even) |
| `DELAY` | 2 | extra reference delay. Tap l reads x(n−1−DELAY−l), so DELAY = 0 still means a one-sample delay. |
| `MU_SHIFT` | 3 | step size, 2μ = 2^−MU_SHIFT (own choice, see above) |
| `CLK_RATIO` | 16 | CLOCK2 cycles per CLOCK1 period |
| `SAMPLE_CLKS` | 1000 | CLOCK2 cycles per sample |

The defaults for order, clock ratio and sample rate are those of the original
FPGA build. DELAY = 2 is the baseline of the original's simulation sweep.
An iteration has to fit in a sample period: (ORDER + 5) · CLK_RATIO <
SAMPLE_CLKS. This is checked at elaboration, and it allows ORDER up to 56 at
8 MHz and 8 kHz.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
with a `TB_RESULT checks=… failures=…` line and has a watchdog. With plain
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_aic_top \
    rtl/aic_pkg.sv tb/tb_aic_top.sv -y rtl -y tb
./obj_dir/Vtb_aic_top
```

The same command works for any other testbench (change the two names).

- **`tb_aic_top`** runs the design at its default parameters. A behavioural
  ADC0804 (`tb/adc0804_model.sv`, a successive-approximation converter with
  a 0–4 V span and a 100 µs conversion) converts a 3 Vpp sine on a 2 V
  offset with ±0.3 V uniform interference. There are 3000 samples at each of
  600, 300 and 700 Hz, with a reset before each tone. After every iteration,
  y, e, the DAC code and all 28 weights are compared with an independent
  integer model of the canceler. The test also checks the 528-cycle
  iteration, the average 1000-cycle sample period, that no read hits a
  running conversion, and that the interference power in y falls. It
  falls to 0.55, 0.54 and 0.59 of the input's over the second half of each
  run. It counts and requires the datapath cases: negative and positive
  samples, two-product pairs, the adder's borrow path, truncated and
  non-zero weight steps, and accumulation over several pairs. Runtime is
  about 10 s.
- **`tb_aic_table51`** runs twelve configurations side by side, each in its
  own `tb/aic_env.sv`, with bit-exact model checks. The configurations are
  order 16/32/64/128, delay 0–3, signal 80/60/40/20 % of the input span, and
  step 2^−3, 2^−7, 2^−10. The test signal is three tones plus interference.
  Orders 64 and 128 do not fit in 1000 cycles per sample, so they run with
  a faster CLOCK2 (2000 and 4000 cycles per sample). The interference power
  ratios are printed but not checked. Most of these configurations use the
  small step sizes, so they show the weight-resolution limit described
  above. Runtime is about 30 s.
- The block testbenches check each arithmetic cell exhaustively or with
  thousands of random vectors against integer arithmetic. They include the
  exact latencies: 11 edges for the multiplier and 12 for either processor.
  The control unit testbench checks the full phase sequence and the pair
  order.

The RTL uses `always_ff`/`always_comb`, packed structs and an enum from the
package, plus a few concurrent assertions (processor operations inside their
window, pair index range, ADC strobes only while selected). It is
synthesizable. The delay line and weights are plain registers
(about 530 flip-flops for ORDER = 28), as in the original, where they were
CLB flip-flops.

## How well it cancels

The cancellation is modest, and word length limits it. At the defaults,
with a 3 Vpp tone and ±0.3 V uniform interference (20 % of the tone's
amplitude), the interference power left in y is 0.54 to 0.59 of the
input's, so its RMS amplitude falls by about a quarter. The original's
integer simulation of its hardware reports about 40 % less interference
magnitude for 300 and 700 Hz tones. It also notes that the hardware falls
well short of its higher-precision software simulation (about 67 % removal
at order 32, about 70 % at order 64) because of word length and truncation.
A sweep of the step size at order 28 gave these power ratios. It was run
with `aic_env` at the defaults apart from MU_SHIFT: 2000 samples of the
three-tone signal at 80 % signal share.

| 2μ | 2^−2 | 2^−3 | 2^−4 | 2^−5 | 2^−6 |
|---|---|---|---|---|---|
| ratio | 1.15 | 0.75 | 0.58 | 1.15 | 6.0 |

At 2^−6 and below the weights hardly leave zero, and y stays close to 0.
At 2^−2 they become too noisy. If the input is known, MU_SHIFT is the first thing
to tune. Wider weights (for example a 16-bit weight register, with only the
multiplier operand narrowed) would remove the lower limit, but the original
does not have them.

## Where this departs from, or adds to, the original

- **One clock with an enable** replaces the separate 500 kHz and 8 MHz
  clocks.
- **The step size** of the original hardware is not known. 2μ = 1/8 is used
  because the original's simulated values (0.05 to 0.0005) mostly fall
  below what an 8-bit weight can resolve.
- **The output is y**, the predicted periodic component. e is brought out too.
- **Saturation** on every overflow, and **zero initial weights and samples**
  after reset.
- **Pipelined conversion**: each iteration reads the conversion started in
  the previous period. One priming conversion start follows reset.
- **Processor latency** is 12 cycles, plus 1 for the accumulator. The
  original quotes 14 and 15 cycles. All of these fit the 16-cycle window.
- Where the original gives only a cell's function, the cell here is the
  simplest logic that does it with the stated latency.
- Not included: the input instrumentation amplifier and 2 V level shifter,
  the ADC0804 and DAC0800 converters, and the reconstruction low-pass
  filter. These are analog parts or bought-in chips, and the top exposes
  their digital interfaces as ports.
