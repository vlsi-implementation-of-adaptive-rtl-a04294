# LMS adaptive FIR filter

A filter whose coefficients are not fixed but learned while it runs. Each
input sample x[n] comes with a desired sample d[n]. The filter forms its
output y[n] from the last N inputs, measures the error e[n] = d[n] - y[n],
and nudges every coefficient in the direction that shrinks that error. This
is the Least Mean Square (LMS) rule:

    y[n]   = sum_{k=0}^{N-1} w[k] * x[n-k]
    e[n]   = d[n] - y[n]
    w[k]  <- w[k] + rate * e[n] * x[n-k]        for every k

Such a filter can learn an unknown system (feed the same input to the system
and to the filter, use the system's output as d) or clean up a signal (feed
the noisy signal as x and a clean reference as d). The hardware is the same
in both cases; only the wiring of x and d differs.

The design is written for an FPGA-style implementation: a row of N tap
cells does the filtering in parallel, and a single shared multiplier then
walks over the N coefficients one per clock to update them.

## Number format

Every data word is 16 bits, signed, Q1.15: the integer value divided by
2^15, so the range is [-1, 1). This covers x, d, y, e, the weights and the
step size `rate`.

- Products (`mult_trunc`) keep bits [30:15] of the 32-bit product, which
  drops the low 15 bits, rounding toward minus infinity. The one product
  that does not fit, (-1) x (-1), saturates to 0x7FFF.
- Sums (the tap adder, the error, the weight update) saturate at the ends
  of the range instead of wrapping.

`rate` plays the role of 2*mu in the usual LMS formula. Because it is a
Q1.15 value, the largest step is just under 1. It is an input port, so it can
change from one sample to the next.

## One iteration, clock by clock

This is the part that needs the most care when using or changing the design.
One LMS iteration takes **N + 4 clocks** (20 at the default N = 16). Let
clock 0 be the clock edge at which `in_valid && in_ready` is seen.

| edge | controller state before the edge | what happens at the edge |
|------|----------------------------------|--------------------------|
| 0 | IDLE (`in_ready` = 1) | `fen` is high. Every tap shifts: tap 0 stores x[n], tap k stores tap k-1's old sample. Every tap's weight register loads w[k] from the register file. d[n] is stored. |
| 1 | FILTER | Each tap's output register takes trunc(x[n-k] * w[k]). |
| 2 | ERROR | The adder output y[n] is valid. y[n] and e[n] = sat(d[n] - y[n]) are registered. |
| 3 | FACTOR (`out_valid` = 1, showing y[n] and e[n]) | e_rate = trunc(e[n] * rate) is registered. |
| 4 .. N+3 | UPDATE, `addr` = 0 .. N-1 | Word `addr` of the weight register file takes w[addr] + trunc(e_rate * x[n-addr]). |

After edge N+3 the controller is back in IDLE. If the next sample is already
waiting, it is taken at edge N+4. `out_valid` is a single-clock pulse 3
clocks after the sample is taken. The output has no back-pressure, so a
consumer must take y and e in that cycle.

The iteration is exact LMS, with no extra delay in the error path. This
works because of two facts:

- The tap weight registers are loaded at edge 0, so the sweep over the
  weights cannot disturb y[n].
- The tap sample registers do not change until the next `fen`, so every
  x[n-k] the update needs is still in place during the sweep.

## Blocks

```
adaptive_filter
 |- lms_filter                 datapath
 |   |- lms_tap  x N           sample reg, weight reg, multiplier, output reg
 |   |   '- mult_trunc
 |   |- tap_adder              N-input saturating adder -> y[n]
 |   |- weight_regfile         N x 16 weights, parallel read, one-hot write
 |   '- weight_update_logic    mux x[n-k], mux w[k], multiply, add, demux
 |       '- mult_trunc
 '- weight_update_ctrl         error comparator, step scaling, sequencer
     '- mult_trunc
lms_pkg                        sample_t, widths, saturating add/sub
```

**lms_tap.** Two registers hold the sample and the weight. They load only on
`fen`, the filter clock enable. A multiplier truncator feeds an output
register that loads on every clock. The stored sample goes out on `u_out`,
which is the next tap's input and also one input of the weight-update
multiplexer. The chain of taps is the filter's delay line.

**tap_adder.** Adds the N tap outputs at full width (16 + log2 N + 1 bits)
and then saturates the sum to 16 bits. It is combinational, fed from the tap
output registers.

**weight_regfile.** N words of 16 bits. All words are always visible on
`w_all`. Each clock, the word whose bit is set in the one-hot `we` takes
`wdata`. An assertion checks that at most one word is written at a time.
Reset clears every word.

**weight_update_logic.** Combinational. For address k it does the following:

1. One 16-bit N:1 multiplexer picks the tap sample x[n-k].
2. The multiplier truncator forms e_rate * x[n-k].
3. A second N:1 multiplexer picks w[k].
4. A saturating adder forms the new weight.
5. A demultiplexer turns k into the one-hot write enable.

**weight_update_ctrl.** The error comparator is e = sat(d - y), taken from
the adder at edge 2. A second multiplier truncator scales e by `rate`. A
five-state machine (IDLE, FILTER, ERROR, FACTOR, UPDATE) drives `fen`,
`upd_en` and the address counter. An assertion checks that the address
stays below N during updates.

## Interface of the top, `adaptive_filter`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst | in | 1 | single clock; synchronous active-high reset |
| in_valid / in_ready | in / out | 1 | (x_in, d_in) is taken at a clock edge where both are high |
| x_in, d_in | in | 16 | input and desired sample, Q1.15 |
| rate | in | 16 | step size (2*mu), Q1.15; sampled in the FACTOR cycle |
| out_valid | out | 1 | one-clock pulse: y_out, e_out hold y[n], e[n] |
| y_out, e_out | out | 16 | filter output and error |
| w_out | out | N x 16 | current weights |

Parameters: `N` (taps, default 16) and `AW` (address width, default
clog2(N)). The `AW` default is meant to be left alone. `N` need not be a
power of two.

After reset all weights and all stored samples are zero. Nothing in the
design loads initial weights; the filter always starts from zero.

## Where this design chose for itself

The block structure follows a published partitioning into four units: tap,
LMS filter, weight update logic and weight update controller. Its 16-bit
paths, the N:1 multiplexers and demultiplexer, the log2 N address and the
multiplier truncators come from the same source. The following are choices
of this implementation:

- **Tap count.** N = 16 is a default, not a fixed property of the design.
- **Clocking.** The original structure has a separate filter clock for the
  taps. Here there is one clock, and the filter clock becomes the `fen`
  enable. This gives the same behaviour with a single timing domain.
- **Error sign.** The error is d - y. With the "+" update rule, only this
  sign makes the weights converge; the other sign (y - d) diverges.
- **Arithmetic.** The Q1.15 format, truncation of products, saturation of
  sums, and the registered e*rate step are all choices of this
  implementation.
- **Control.** The sequencer's states, the valid/ready handshake and the
  synchronous reset are also choices of this implementation.
- **Throughput.** A 16-tap design needs 20 clocks per sample. At a 50 MHz
  clock that is 2.5 MS/s. A design that spends one 20 ns clock per tap and
  nothing more would reach 3.125 MS/s at 16 taps. This design spends four
  extra clocks on filtering, the error and the step scaling, because it
  keeps exact (not delayed) LMS.

## Verification

Each block has a self-checking testbench in `tb/` that compares it against
an integer model in `tb/tb_ref_pkg.sv`. That model is written independently
of the RTL's bit slicing: it uses 64-bit products, floor division by 2^15
and clamping.

| testbench | what it checks |
|-----------|----------------|
| tb_mult_trunc | corner products and 2000 random products |
| tb_tap_adder | random sums, including both saturation ends |
| tb_lms_tap | register loading with and without `fen`, one-clock product latency |
| tb_weight_regfile | reset, random one-hot writes |
| tb_weight_update_logic | new weight and write enable for random operands |
| tb_weight_update_ctrl | error, scaled error, address sweep, no acceptance while busy, N + 4 period |
| tb_lms_filter | y[n] and all weights over 400 iterations against a model of the whole datapath |
| tb_adaptive_filter | end-to-end at the default N = 16, described below |

`tb_adaptive_filter` compares y, e and every weight bit for bit with the
model on every sample. It also checks the 3-clock latency and the 20-clock
back-to-back period. It runs two scenarios:

- **System identification.** 800 samples of uniform random input (±0.25)
  drive an 8-tap FIR, and the FIR's output is the desired signal. All 16
  weights must end within 400 LSB of the FIR's taps, which are zero beyond
  the eighth. Observed: the mean |e| falls from about 1370 LSB to about
  19 LSB.
- **Noise reduction.** The input is 0.5·cos(2πn/50) plus uniform noise of
  ±0.2, and the desired signal is the clean cosine. Observed: the mean |e|
  over the last 200 samples is about 740 LSB, against a mean |noise| of
  about 3250 LSB.

The test also counts the handshake stalls, the back-to-back periods and
the writes to each weight address. It fails if any of these never
happened. It prints the mean errors of both runs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lms_pkg.sv tb/tb_ref_pkg.sv tb/tb_adaptive_filter.sv \
    --top-module tb_adaptive_filter -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. Each
has a watchdog that ends the run with a failure if it hangs. Replace the
testbench name to run a block's own test. For a lint check of the RTL only:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/lms_pkg.sv rtl/adaptive_filter.sv
```

## Changing it

- **Number of taps.** Set `N` on `adaptive_filter`. The adder grows its
  internal width on its own. The sample period is always N + 4 clocks.
- **Word width.** `DATA_W` and `FRAC_W` in `lms_pkg` set the format.
  `lms_pkg::trunc_product` keeps bits [FRAC_W + DATA_W - 1 : FRAC_W] of
  each product, so the two values must stay consistent with each other.
- **Throughput.** The update sweep is the long part. Two routes are open:
  - Several `weight_update_logic` instances, each serving its own share of
    the addresses, shorten the sweep.
  - Overlapping the sweep with the next sample's filtering turns the
    algorithm into delayed LMS, and the testbench's model would have to
    change with it.
