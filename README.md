# Variable-latency adders in a sigma-delta decimation filter

Most additions never use the longest carry chain of an adder. A
**variable-latency adder** makes use of this. It runs at a clock period that
covers the common, short carry chains. A cheap detector spots the operands
that could produce a long chain, and for those the result is captured one
cycle later. Throughput stays at one addition per clock for almost all
operands. The adder can therefore run at a lower supply voltage, or a
shorter period, than a fixed-latency adder. The same detector gives a
margin against ageing: NBTI (negative bias temperature instability) slowly
raises transistor delay, and the detector can be told to class more
operations as long.

This RTL applies that adder to every addition of a decimation filter for a
sigma-delta ADC in an ECG (electrocardiogram) front end, where the signal
band is 0.05 to 150 Hz:

```
 sd_bit  19.2 kHz ──► CIC, order 3, /16 ──► 1.2 kHz ──► half-band 1, /2 ──► 600 Hz
                                                  ──► half-band 2 (45 taps), /2 ──► 300 Hz  out_data
```

Each of the three stages owns one 64-bit variable-latency carry-select adder
(VL-CSA) and performs all of its additions on it, one after another.

## The variable-latency adder

### Carry-select adder (`csa_adder`)

The 64-bit operands are cut into carry-select stages of 8 bits. The lowest
stage adds with the real carry-in. Each higher stage computes its sum twice,
once for a carry-in of 0 and once for 1, using two ripple-carry adders. A
multiplexer driven by the carry from the stage below then picks one of the
two. A carry that starts at the bottom of some stage ripples through that
stage and then through the carry multiplexers of all the stages above it.
How far it travels depends entirely on the operands.

### Carry length detection (`cldc`)

A carry can only cross bit *i* if that bit propagates it, that is, if
`a[i] ^ b[i]` is 1. The detector watches bits 31 to 37 in the middle of the
adder:

```
long_op = &(a[37:31] ^ b[37:31])            // th_adj = 0
long_op = &(a[37:32] ^ b[37:32])            // th_adj = 1
```

If any bit in the window kills or generates a carry, no carry can run from
the lower half of the adder into the upper half. The slowest path is then
short enough for one cycle. `th_adj` is the ageing adjustment. Raising it
drops bit 31 from the window, so more operand pairs count as long. The
window position (31..37) and the 64-bit width come from the original VL-CSA
design. The size of the `th_adj` shift (one bit) is a choice of this RTL.
In normal use `th_adj` is held low.

### Stretching the cycle (`vl_adder`)

In silicon, a long operation gates off one edge of the destination
register's clock, so the register captures on the following edge. In this
RTL the gated edge is a clock enable, `capture`:

| cycle | short operation | long operation |
|---|---|---|
| 1 | `capture = 1`, result taken | `capture = 0`, `held_q` set |
| 2 | next operation | `capture = 1`, result taken |

The user presents `op_valid`, `a`, `b` and `cin`, and holds them until
`capture` is high. It loads `sum` into its own register on that edge. An
assertion checks that the operands stay stable while an operation is
stretched. The RTL is functionally exact whatever the clock period. The
power or speed benefit only appears once the clock is set to the short-path
delay of the synthesised adder. That timing closure is outside the RTL.

A consequence of using a 64-bit adder for narrow filter data is worth
knowing. Operands are sign-extended, so bits 31 to 37 of both operands are
copies of their sign bits. When a positive and a negative number are added,
every bit of the window propagates, and the operation is stretched. That is
correct, because the carry really does run through the whole sign extension.
But it makes long operations common in this filter: in simulation roughly a
third to a half of the additions of each stage are stretched.

## The decimation chain

### CIC decimator (`cic_decimator`)

The transfer function is H(z) = ((1 − z^-RM) / (1 − z^-1))^N, with N = 3,
R = 16 and M = 1. The integrators run at the input rate. The combs run after
the rate change, so each comb needs only M delay words. The adder schedule
is:

* every input: `I1 += x`, then `I2 += I1`, then `I3 += I2`;
* every 16th input: `C1 = I3 − D1`, `C2 = C1 − D2`, `C3 = C2 − D3`, each
  delay word taking the stage's input, followed by output of `C3`.

Subtraction is `a + ~b + 1`, using the adder's carry-in. The registers are
`IN_W + N·log2(R·M)` = 14 bits wide and wrap around. As in any CIC filter,
integrator overflow cancels in the combs and the output is exact. Output
*m* is produced after input 16·*m* + 15 and equals
Σ_k h[k]·x[16m+15−k], where h is the 46-tap response of
(1 + z^-1 + … + z^-15)^3. The DC gain is 16^3 = 4096.

The top module feeds the modulator bit as +1 (`sd_bit = 1`) or −1 (`sd_bit = 0`),
which is a 2-bit signed input. The CIC output therefore lies between −4096 and
+4096.

### Half-band decimators (`hb_decimator`)

In a half-band low-pass filter every second coefficient is zero, except the
centre one, which is 0.5. The coefficients are also symmetric. After every
second input the module computes one output from its delay line
(`x[0]` = newest sample):

```
for each pair k = C-1, C-3, ..., 0 or 1          (C = centre tap)
    p = x[k] + x[TAPS-1-k]                       -- VL adder
    for each set bit s of |COEF[k]|
        acc = acc ± (p << s)                     -- VL adder, − for COEF[k] < 0
for each set bit s of |COEF[C]|
    acc = acc ± (x[C] << s)                      -- VL adder
y = acc[30:15]                                   -- >> 15, truncate to 16 bits
```

Only the non-zero taps are visited. For 45 taps that is 11 pairs plus the
centre, 23 non-zero coefficients. For the 11-tap filter it is 3 pairs plus
the centre. There is no multiplier. Each product is built from shifted
copies of the pre-sum, one addition per set bit of the coefficient's
magnitude. A priority encoder picks the lowest remaining bit each clock, so
zero bits cost nothing. Subtraction again uses `a + ~b + 1`. With the
coefficients below, one output takes 56 additions in the 45-tap filter and
22 in the 11-tap filter.

| instance | taps | non-zero | rate | coefficient design |
|---|---|---|---|---|
| `u_hb1` | 11 | 7 | 1.2 kHz → 600 Hz | ideal half-band × Hamming window |
| `u_hb2` | 45 | 23 | 600 Hz → 300 Hz | ideal half-band × Blackman window |

The coefficients live in `decim_pkg` as Q1.15 integers:

```
h[n] = round(32768 · 0.5 · sinc((n − c)/2) · w[n]),  c = (TAPS−1)/2,  sinc(x) = sin(πx)/(πx)
Hamming  w[n] = 0.54 − 0.46 cos(2πn/(TAPS−1))
Blackman w[n] = 0.42 − 0.5 cos(2πn/(TAPS−1)) + 0.08 cos(4πn/(TAPS−1))
```

Taps at an even, non-zero distance from the centre are forced to 0. The
Blackman window puts zeros at both ends of the 45-tap set. Its 23 non-zero
taps therefore span 43 positions. To use other coefficients, edit
`decim_pkg`. `hb_decimator` takes any odd `TAPS` with a half-band structure
through its `COEF` parameter.

### Handshakes and cycle budget

The stages are joined by valid/ready pairs. A stage accepts an input only
when idle, and it holds its output until the next stage takes it. So a busy
half-band filter holds back the CIC, and the CIC holds back the input
(`in_ready` low). Each addition costs 1 clock, or 2 if it is stretched:

| stage | clocks |
|---|---|
| CIC, per input bit | 1 + 3 additions → 4 to 7 |
| CIC, per 16 bits, extra | 3 additions + output → 4 to 7 |
| HB1, per output | 2 inputs + 22 additions + output → 25 to 47 |
| HB2, per output | 2 inputs + 56 additions + output → 59 to 115 |

Even with no overlap between stages, 64 input bits need at most 685 clocks.
A system clock of 250 kHz or more therefore keeps up with a 19.2 kHz
modulator. Any faster clock works equally well, because `in_valid`/`in_ready`
paces the input.

## Interfaces

`decim_filter_top` (all defaults are the configuration described above):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock, asynchronous active-low reset |
| `th_adj` | in | 1 | ageing threshold adjust for all detectors, normally 0 |
| `in_valid` / `in_ready` | in / out | 1 | modulator bit handshake |
| `sd_bit` | in | 1 | modulator output, 1 = +1, 0 = −1 |
| `out_valid` / `out_ready` | out / in | 1 | output word handshake |
| `out_data` | out | 16 | signed 300 Hz output, gain about 4096 for a DC input |
| `vl_stall` | out | 3 | stage (0 CIC, 1 HB1, 2 HB2) is stretching an addition this cycle |

`cic_decimator` and `hb_decimator` share the same pattern of ports:
`th_adj`, `in_valid/in_ready/in_data`, `out_valid/out_ready/out_data` and
`vl_stall`. `vl_adder` is described above. `csa_adder` and `cldc` are purely
combinational.

## What is fixed and what was chosen

These numbers come from the original design: 64-bit carry-select adder,
detection window on bits 31..37, two-cycle long operations, a
threshold-adjust input held low, CIC order 3 with rate change 16 and
differential delay 1, two half-band stages of 2 each, a 45-tap second
half-band filter with 23 non-zero coefficients, and 19.2 kHz → 1.2 kHz →
600 Hz → 300 Hz.

These are choices of this RTL:

* the 8-bit carry-select stage width;
* shift-and-add over the set bits of each coefficient in place of a
  multiplier;
* how `th_adj` moves the threshold;
* the clock enable in place of a gated clock, and the valid/ready
  handshakes;
* time-sharing one adder per stage;
* the 11-tap length of the first half-band filter;
* all coefficient values, their Q1.15 format, and truncation without
  rounding or saturation;
* the data widths: 2-bit CIC input, 14-bit CIC, 16-bit half-band path;
* the output phase of each decimator;
* asynchronous reset.

Some parts are not included. The sigma-delta modulator itself is a
mixed-signal block. The ageing monitor that would drive `th_adj` senses
transistor degradation, which is not a logic function. Both are left
outside; `th_adj` is a top-level input. The fixed-latency carry-select
filter, which served only as a baseline for comparison, is not included
either.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

* `tb_csa_adder`: directed carries across each 8-bit boundary, plus 7000
  random and propagate-heavy vectors, checked against `a + b + cin`.
* `tb_cldc`: 4000 vectors, half of them built to propagate in the window,
  both `th_adj` values, checked against a bit-by-bit reference.
* `tb_vl_adder`: 3000 held operations. It checks each sum and a latency of
  exactly 1 cycle for short and 2 cycles for long operations, with idle
  cycles in between.
* `tb_cic_decimator`: random inputs over the full 2-bit range, random input
  gaps and output back-pressure. 200 outputs are checked against a direct
  convolution with the CIC impulse response. Each latency must be
  7 clocks plus one per stretch.
* `tb_hb_decimator`: the 45-tap and the 11-tap configuration side by side.
  150 outputs each are checked against direct convolution over all taps.
  Each latency must be 1 + pairs + set coefficient bits, plus one clock per
  stretch.
* `tb_decim_filter_top`: the whole chain at default parameters, driven by a
  first-order sigma-delta modulator model in the testbench (0.3 + 0.5 sine).
  120 output words, from 7680 input bits, are checked against a chained
  convolution model. They must also follow 4096·(0.3 + 0.5 sin); they swing
  from −815 to 3288 against an ideal −819 to 3277. The test also checks the
  64 : 1 rate. It requires that each stage stretched at least once, that a
  stretch happened with `th_adj` high, that every rate change fired, and that
  input and output back-pressure each occurred.

Each testbench runs in well under a second with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/decim_pkg.sv \
    tb/tb_decim_filter_top.sv --top-module tb_decim_filter_top -y rtl
./obj_dir/Vtb_decim_filter_top
```

The testbenches check that the RTL computes the filter exactly. They do not
measure filter quality (stop-band attenuation, passband ripple). They also
say nothing about the timing or power of a synthesised adder.
