# P2SPT acoustic feedback canceller for hearing aids

An in-the-ear hearing aid puts its loudspeaker (the *receiver*) a few
millimetres from its microphone. Part of the amplified output leaks back
into the microphone, is amplified again, and with enough gain the loop
howls. A feedback canceller removes the leak digitally. It runs an adaptive
FIR filter on the signal sent to the receiver, which gives an estimate of
the echo. It subtracts that estimate from the microphone signal before the
hearing-aid processing (the *forward path*) sees it.

This design does that at a power budget of tens of microwatts. It combines
two ideas.

* **A cheap adaptive algorithm: P2SPT** (partial and progressive signed
  power-of-two). Each coefficient is a small counter that moves by at most
  one step per update. The step follows the signs of the error and of the
  reference (sign-sign LMS). The counter's base-4 digits choose powers of
  two, so filtering needs only shifts and adds, with no multiplier. Updates
  happen only on every 2nd sample, or every 4th once the coefficients have
  grown.
* **A fully folded datapath.** At 16 kHz a 32-tap filter needs so little
  work that one tap unit does all of it: it runs at 512 kHz, 32 cycles per
  sample, one tap per cycle. The delay line and the coefficients are
  therefore not shift registers. They sit in two small two-port register
  files (SRAM-style macros in silicon), addressed circularly, so no sample
  is ever moved.

Default configuration: 32 taps, 12-bit samples (two's complement Q1.11),
7-bit counters, 3 power-of-two bases, 16 kHz sample rate with a 512 kHz
clock. Synthesised with yosys, the design has about 170 cells and 143
flip-flops outside the two memories, which hold 32x12 + 32x7 = 608 bits.

## The loop it sits in

```
 speech s ──►(+)── d ──►[ canceller: e = d - y ]── e ──►[ forward path ]──► u ──► receiver
             ▲                 ▲ y                                       │
             │                 └─────── adaptive FIR on x = u ◄──────────┤
             └──────────────── acoustic echo path h ◄────────────────────┘
```

The canceller gets two samples per sample period: `x_in`, the signal sent to
the receiver, and `d_in`, the microphone signal. It returns `y_out`, the
echo estimate, and `e_out = d - y`, the cleaned microphone signal that goes
on into the forward path.

## Coefficients as counters

Each tap k has a signed counter c(k) in [-63, +63]. The coefficient is a
sum of NB = 3 power-of-two terms, one per base-4 digit of |c|:

```
p(i)  = floor(|c| / 4^i) mod 4                  i = 0, 1, 2
w     = sign(c) * sum_i binary(p(i)) * 2^-r(i)
binary(0) = 0, binary(1) = 1, binary(2) = 2, binary(3) = 4
r     = (9, 7, 5)                               (BASE_EXP)
```

So each digit switches its base off, or applies it once, twice or four
times. Every such term is a shift of x: `x >>> (r(i) - (p(i) - 1))`. One
counter step changes w by 2^-9, the smallest base. The largest coefficient
is 4·(2^-9 + 2^-7 + 2^-5) ≈ 0.164. The mapping is monotonic but not linear,
and neighbouring counts can give the same w (for example c = 3 and c = 4 both
give 2^-7). This is how the scheme is built: small coefficients get fine
resolution, and a 7-bit counter reaches large ones quickly.

The bound ±(2^(2·NB) − 1) = ±63 keeps the counter inside 7 bits. A step past
the bound is clipped, and `bound_hit` reports it.

## Update rule and the partial unit

For iteration n, with e(n) = d(n) − y(n):

```
c(k) <- bound( c(k) + partial_n * sign(e(n)) * sign(x(n-k)) )
partial_n = (n % ALPHA == 0) && ( max_{k in window} |c(k)| <= DELTA_B  ||  n % BETA == 0 )
```

ALPHA = 2 and BETA = 4. The decision window is taps DELTA_S … DELTA_S+DELTA_L−1
(0…7 by default), and DELTA_B = 32. While the leading taps are small, so
the filter is still converging, every 2nd error updates the coefficients.
Once they have grown, only every 4th does. This halves the update activity
in steady state. `upd_en` shows the decision made for the error just
produced, and `slow_mode` shows which rate applies.

`p2spt_partial` finds the maximum as the freshly updated counters stream
past the tap unit. It needs no extra memory reads. The decision is
registered at the last tap of the pass and used in the next pass.

## Folding: one pass per sample

This is the part that needs the most care. A new sample starts a *pass* of
TAPS = 32 cycles, t = 0 … 31. The new sample is x(n). What the input file
holds at the start of the pass reaches back to x(n−1). The pass does two
jobs for every tap k = t:

1. **It finishes the previous iteration's update.** It applies
   `sign(e(n−1))·sign(x(n−1−k))` to c(k), if the partial unit allowed it.
   This is what an unfolded filter would have done at the end of iteration
   n−1. Folding it into the next pass means each counter is read and written
   once per sample, not twice.
2. **It filters with the updated coefficient**, adding w(k)·x(n−k) into the
   accumulator.

The sample the update needs for tap k is x(n−1−k). The filter needs
x(n−k), which is the update sample of tap k−1. So the tap unit reads only
one sample per cycle and keeps the previous one in a register. For k = 0 it
uses the new sample, held in the top level since `in_valid`.

### The register files and the circular pointer

`p2spt_rf` is a generic 1-write/1-read memory. The read is registered, as
in a synchronous SRAM, and the memory has no reset. There are two
instances: 32x12 for samples and 32x7 for counters.

The control unit (`p2spt_ctrl`) keeps a write pointer, `in_write_ctl`. At
cycle 0 of a pass the previous sample x(n−1) is written at the pointer, over
the oldest sample. The pointer then advances by one. The read address in
cycle t is `pointer − t` (`in_read_ctl`), so the reads return x(n−1),
x(n−2), … x(n−32), newest first. The data never moves; only the start
address does. This replaces the 31 register-to-register moves per sample
that a shift-register delay line makes.

### The start unit

In cycle 0 the sample file is written and read at the same address. A
two-port SRAM does not define the read data in that case. `p2spt_rf_start`
sees the collision and keeps a copy of the write data. In the next cycle it
hands the copy to the tap unit in place of the memory's output (`bypass`).
The word is still written into the memory for the later reads. This
happens once per pass.

### Two-stage pipeline

Stage A (control unit) issues the reads for tap t. Stage B (tap unit)
receives the data one cycle later and computes the new counter, the
coefficient terms and the accumulation. It writes the new counter back to
the counter file at tap t−1 while the read for tap t is in flight, so
reads and writes never address the same entry of that file. After the last
tap, stage B saturates y, computes e, registers both and pulses
`out_valid`. The partial unit takes its decision in the same cycle.

## Interface and timing (`p2spt_aec`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | fold clock, 512 kHz = 32 × 16 kHz |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `ready` | out | 1 | high once both register files have been cleared (TAPS cycles after reset) |
| `in_valid` | in | 1 | one-cycle strobe: `x_in` and `d_in` are valid |
| `x_in` | in | 12 | reference: the sample sent to the receiver |
| `d_in` | in | 12 | microphone sample |
| `out_valid` | out | 1 | one-cycle strobe: `y_out` and `e_out` are new |
| `y_out` | out | 12 | echo estimate, saturated |
| `e_out` | out | 12 | d − y, saturated |
| `upd_en` | out | 1 | the error just produced will update the counters in the next pass |
| `slow_mode` | out | 1 | the update period is BETA (window counters above DELTA_B) |
| `bypass` | out | 1 | the start unit supplies the sample-file read this cycle |
| `bound_hit` | out | 1 | a counter was clipped by the bound this cycle |

* Assert `in_valid` only while `ready` is high, at most once every TAPS
  cycles. An assertion in the control unit checks this. At full rate
  `in_valid` comes exactly every 32 cycles.
* The result of a sample is registered by the TAPS-th clock edge after the
  edge that takes `in_valid`. At full rate it appears one cycle after the
  next sample has been taken. It holds until the next result.
* The canceller keeps its state between samples. Nothing but reset clears it.

## Arithmetic

Before shifting, x is sign-extended by GUARD = 9 fraction bits, which equals
the smallest base exponent. Every power-of-two term is therefore exact. The
accumulator is 12 + 9 + 5 + 2 = 28 bits wide and cannot overflow.
Truncation happens only once: y is the accumulator shifted right by GUARD
(rounding towards −∞) and saturated to 12 bits. e = d − y is also
saturated to 12 bits. The sign of e is registered for the next pass's
update. sign(x) and sign(e) take the values −1, 0 and +1, so a zero sample
or a zero error leaves the counter alone.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `TAPS` | 32 | published design (32 taps, folded 32 times); must be a power of two |
| `XW` | 12 | published design (12-bit words) |
| `CW` | 7 | published design (7-bit counter file) |
| `NB` | 3 | published design (three bases) |
| `BASE_EXP` | {9, 7, 5} | own choice, see below |
| `ALPHA`, `BETA` | 2, 4 | published design (update on n/2, or n/4) |
| `DELTA_S`, `DELTA_L`, `DELTA_B` | 0, 8, 32 | own choice |
| `GUARD` | 9 | own choice (exact terms) |

## Module hierarchy

```
p2spt_aec            top: sample registers, wiring
├── p2spt_ctrl       control unit: pointers, addresses, stage-B strobes, start-up clearing
├── p2spt_rf         input sample file (32 x 12)
├── p2spt_rf_start   start unit: same-address bypass for the sample file
├── p2spt_rf         counter file (32 x 7)
├── p2spt_tap        tap unit: update, bound, progressive coefficient, shift-add MAC, y/e
└── p2spt_partial    partial unit: update-rate decision
p2spt_pkg            shared defaults and the three-valued sign type
```

## Departures and own choices

The architecture follows the published design: four units (control,
partial, tap, register files) plus the register-file start unit. The
datapath is folded 32 times, and the update is sign-sign with bounded
counters and progressive power-of-two coefficients. The following points
are this implementation's own:

* **Base exponents (9, 7, 5).** The number of bases is given, their values
  are not. The choice follows a four-base example with bases 2^-3 … 2^-9,
  keeps the three finest, and puts the least significant digit on the
  smallest base.
* **Partial-update window and threshold** (DELTA_S = 0, DELTA_L = 8,
  DELTA_B = 32). They are named in the algorithm but given no values. The
  window is compared on |c|, because the counters are signed. At equality
  with DELTA_B the fast rate applies.
* **Negative counters.** The coefficient is sign(c) times the digits of |c|.
  The digit formula is defined only for non-negative values. The lower bound
  is taken as −63, the mirror of +63.
* **Order of update and filtering.** The update with e(n−1) is folded into
  pass n, ahead of each tap's filtering. This gives the same numbers as
  updating at the end of iteration n−1.
* **Guard bits, truncation and saturation** of y and e, as described under
  Arithmetic.
* **Interface.** The valid strobes and `ready`, the status outputs `upd_en`,
  `slow_mode`, `bypass` and `bound_hit`, and the start-up clearing of both
  files, which gives the zero initial state x(0) = w(0) = 0 the algorithm
  starts from.
* **Register files** are plain arrays with a registered read. In silicon
  they would be the foundry's two-port register-file macros (32x12 and
  32x7). The start unit exists because such a macro does not define a read
  that collides with a write.

* **Test loop.** The published evaluation uses a measured 100-tap echo
  path and recorded voices. The test benches use a synthetic 40-tap echo
  path and synthetic voiced signals of the same lengths. Their dB figures
  are therefore not comparable one-to-one with published MSE values.

Not part of this RTL: the A/D and D/A converters, the forward-path
processing (taken to be a pure delay), and the power figures. Those figures
depend on the cell library and the SRAM macros.

## Verification

Every block has a self-checking test bench. Each ends by printing
`TB_RESULT checks=… failures=…`, and each has a watchdog.

| test bench | what it checks |
|---|---|
| `tb_p2spt_rf` | random reads and writes against a shadow array; same-address reads return the old word |
| `tb_p2spt_rf_start` | file plus start unit: reads always return the newest word; bypass flag |
| `tb_p2spt_ctrl` | start-up clearing, all addresses of a pass, stage-B strobes, iteration flags |
| `tb_p2spt_partial` | the update decision against the formula, for random counters and both rates |
| `tb_p2spt_tap` | counter update, clipping and every y/e against a multiplier-based model |
| `tb_p2spt_aec` | end to end, at default parameters (below) |
| `tb_p2spt_aec_workloads` | voice, forward-delay and long-run tests (below) |

The system tests share `p2spt_aec_loop`. This harness closes the
hearing-aid loop around one canceller at its default size. The pieces are:

* **Echo path.** A 40-tap decaying oscillation with a 2-sample acoustic
  delay. Every 3 ms its gain is redrawn within ±10 % and its delay moves by
  −1, 0 or +1 sample.
* **Forward path.** A pure delay (50 samples by default) followed by 12 dB
  of receiver gain.
* **Reference model.** A sample-level model of the algorithm, written with
  multiplications rather than shifts. Every y and e must match it bit for
  bit. Every result must also come exactly TAPS edges after its sample,
  with samples arriving every 32 cycles.
* **Pass criterion.** Over the last quarter of the run, the mean square of
  the output minus the speech must be lower than in the same loop without a
  canceller. The harness also counts bypass reads, clipping, skipped
  updates and both update rates.

Results:

* **`tb_p2spt_aec`**: white noise, 8000 samples. Output error 8.9 dB below
  the loop without a canceller. Every mechanism occurs.
* **`tb_p2spt_aec_workloads`**: eight cancellers run side by side.
  * Four synthetic voices (man, woman, boy, girl) for 12000, 18000, 20000
    and 15000 samples: 11.7, 14.1, 9.7 and 15.7 dB.
  * The man's voice with forward delays of 100, 150 and 300 samples: 7.4,
    9.4 and 5.7 dB. The residual error with the canceller is about the same
    at every delay. Only the no-canceller reference grows more slowly with
    a long delay.
  * The man's voice for 700000 samples (44 s): still 10.9 dB below at the
    end.

A known limit of the sign-sign update shows in these runs. With a weak echo
path that leaves the loop stable without cancellation (peak tap 0.04), the
strongly periodic voiced test signals bias the adaptation. The output error
then ends up higher than with no canceller at all. The tests therefore use
a peak tap of 0.1, where the uncancelled loop howls.

## Simulating with Verilator

Each test bench is a top-level module. Run it from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -j 0 \
  -y rtl -y tb rtl/p2spt_pkg.sv tb/tb_p2spt_aec.sv \
  --top-module tb_p2spt_aec -o sim
./obj_dir/sim
```

Replace `tb_p2spt_aec` with any test bench listed above. The package file is
given explicitly; every other module is found through `-y`.
`tb_p2spt_aec` runs in a few seconds. `tb_p2spt_aec_workloads` takes about
a minute and a half, nearly all of it the 700000-sample run. Adding
`+verilator+rand+reset+2` at run time starts every unreset flop at a random
value. The test benches pass that way too.

To try another configuration, change the parameters of `p2spt_aec`: bases,
thresholds, or a different TAPS as a power of two. The harness in
`tb/p2spt_aec_loop.sv` fixes its model to the default sizes, so change its
local parameters to match.
