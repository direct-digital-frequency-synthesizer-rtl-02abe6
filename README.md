# ROM-less DDFS with a scale-free micro-rotation CORDIC

A direct digital frequency synthesizer (DDFS) makes sine and cosine samples at
a frequency set by a digital word. The usual design keeps a sine table in ROM
and looks it up with an accumulated phase. This design has no table. It
computes every sample with a CORDIC that uses only shifts and add/subtract.
Because it uses a *scale-free* variant, it also needs no table of arctangent
angles and no final multiply by the CORDIC gain 0.607.

```
 fcw ──► phase_accumulator ──► octant_fold ──► sf_cordic ──► octant_unfold ──► sin_out
          (N-bit, +FCW per      (3 octant bits,  (iterative,    (swap / negate    cos_out
           sample, wraps)        angle in rad)    1 rotation/clk) by octant)       (to DACs)
```

The default sizes are an 8-bit frequency control word (FCW) and accumulator,
and a 16-bit CORDIC. With these, the output frequency is

    f_out = f_clk / 19 * FCW / 256

The synthesizer makes one sample every 19 clocks. The DAC and the analog
reconstruction filter that follow a DDFS are not part of this RTL.
`sin_out`, `cos_out` and `sample_valid` are their inputs.

## The scale-free micro-rotation

A conventional CORDIC rotates by the angles atan(2^-i). It must store those
angles, and it stretches the vector by a constant gain that has to be removed
afterwards. The scale-free variant rotates instead by angles that are exact
powers of two, theta = 2^-s rad. It replaces sin and cos of such a small angle
with short Taylor series:

    cos theta ~ 1 - theta^2/2          sin theta ~ theta - theta^3/8

With theta = 2^-s, every product is a right shift:

    x' = (x - x>>(2s+1)) - (y>>s - y>>(3s+3))
    y' = (x>>s - x>>(3s+3)) + (y - y>>(2s+1))

The cubic term uses 1/8, not the Taylor series' 1/6, and that is deliberate.
With 1/8 the squared length after one rotation is exactly 1 + theta^6/64.
Even for the largest step (s = 2), the squared length grows by only 2^-18,
so no gain correction is needed. `sf_rotator` is this datapath: six
shifters, four subtractors and two adders, all combinational. Both outputs are
computed from the *old* x and y.

### Which rotations to do

The angle is an unsigned W-bit binary fraction in radians: bit k is worth
2^(k-W) rad, so the 16-bit word covers [0, 1) rad. Each set bit is therefore
a rotation by a power of two that the rotator can do directly. `sf_shift_gen`
picks one per clock:

1. Find the most significant one, at position M, in the residual angle z.
2. If M is the top bit (0.5 rad), a 0.5 rad Taylor step would be too coarse.
   Rotate by 0.25 rad instead (s = 2) and subtract 0.25 from z. At most two
   such steps are needed before the top bit clears.
3. Otherwise rotate by 2^-(W-M), so s = W - M, and clear bit M.
4. Repeat until z = 0.

All rotations go the same way, anticlockwise, so unlike a classic CORDIC
there is no direction bit. The number of rotations depends on the angle:

    n = popcount(theta)         (+1 or +2 when theta >= 0.5 rad)

At W = 16, n is at most 16 for angles below pi/4, and at most 17 = W+1 for
any angle.

Example, theta = 0101100101010001b (0.3489 rad). The rotations use
M = 14, 12, 11, 8, 6, 4, 0, so s = 2, 4, 5, 8, 10, 12, 16. The paired shifts
2s+1 are 5, 9, 11, 17, 21, 25, 33, and 3s+3 are 9, 15, 18, 27, 33, 39, 51.
The result is cos = 30789 and sin = 11224, with 1.0 = 32768. The ideal values
are 30794 and 11202.

### Accuracy

Over all 16-bit angles below pi/4, the result is within 47 LSB of the true
value (1.0 = 32768), about 0.14 %. The worst case is at 0.75 rad, which takes
two of the coarse 0.25 rad steps. The error comes from the Taylor truncation
at the larger steps and from truncating every shifted term. The testbenches
allow 64 LSB in the CORDIC and 66 LSB at the synthesizer outputs.

### `sf_cordic` timing

`sf_cordic` is the iterative engine. It holds registers x, y and z, and a
two-state FSM (IDLE, ROTATE).

- A `start` while `ready` loads (x, y) = (1.0, 0) and z = theta.
- Each following clock applies one micro-rotation.
- In the first clock that finds z = 0, the vector is copied to
  `cos_out`/`sin_out` and `done` pulses.
- Start to done takes n+2 clocks. The worst case over all angles is
  W+3 = 19 clocks (`ddfs_pkg::cordic_period`).

x and y are unsigned, with 1.0 = 2^(W-1). For a rotation below 1 rad, x only
shrinks and y stays below 0.85, so W bits are enough.

## From full turn to first octant

The micro-rotations cover 0 to pi/4 well. Octant symmetry gives the rest of
the circle.

`octant_fold` takes the top three phase bits as the octant. It maps the
remaining R = N-3 bits r to an angle in [0, pi/4]:

    theta = (odd octant ? 2^R - r : r) * round(pi/4 * 2^W) >> R

The fold is exact: r = 0 in an odd octant gives exactly pi/4. This costs one
extra bit on r. The multiply is by a constant, so in hardware it reduces to
shifts and adds.

`octant_unfold` undoes the fold. With c, s the cosine and sine of the folded
angle, it gives (sin, cos):

| octant | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| sin | s | c | c | s | -s | -c | -c | -s |
| cos | c | s | -s | -c | -c | -s | s | c |

The outputs are W-bit two's complement. +1.0 is reached only at multiples of
90 degrees, and it saturates to 2^(W-1)-1. -1.0 is exact.

## Sample timing in `ddfs_top`

The CORDIC's latency depends on the angle, but a DAC needs evenly spaced
samples. `ddfs_top` therefore runs a fixed sample timer with period
`SAMPLE_CYCLES`, which defaults to the worst-case period W+3. On every tick,
three things happen:

- The CORDIC starts on the folded current phase, and the octant is saved for
  the output stage.
- The accumulator advances by FCW.
- The output register loads the unfolded result of the *previous*
  conversion, and `sample_valid` pulses.

A phase taken at one tick therefore appears on the outputs at the next tick,
exactly one sample period later. The first tick after reset produces no
sample. An assertion checks that the CORDIC is idle at every tick. If you
lower `SAMPLE_CYCLES` below W+3, that assertion will fire.

`phase_accumulator` is a plain N-bit adder and register that wraps modulo
2^N. It adds FCW when `step` is high. Its carry out is registered as `wrap`,
which `ddfs_top` brings out as `phase_wrap`. `wrap` marks the sample in which
the phase completed a turn.

## Interface of `ddfs_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | synchronous reset, active low |
| fcw | in | N | frequency control word; sampled at each tick |
| sin_out, cos_out | out | W | signed samples, 1.0 = 2^(W-1) |
| sample_valid | out | 1 | high for the one clock in which new samples appear |
| phase | out | N | accumulator phase |
| phase_wrap | out | 1 | the last tick's addition overflowed |

| parameter | default | meaning |
|---|---|---|
| N | 8 | FCW and accumulator width (at least 4) |
| W | 16 | CORDIC width (up to 31) |
| SAMPLE_CYCLES | W+3 | clocks per output sample |

Frequency resolution is f_clk / (SAMPLE_CYCLES · 2^N). The phase has only
N = 8 bits, so with 3 bits taken for the octant, each octant has only 32
distinct angles. For finer frequency steps or cleaner spectra, raise N. The
CORDIC does not change.

## Files

| file | contents |
|---|---|
| `rtl/ddfs_pkg.sv` | shared types and constants: pi/4, cycle bounds |
| `rtl/phase_accumulator.sv` | FCW accumulator |
| `rtl/octant_fold.sv` | phase to first-octant angle in radians |
| `rtl/sf_shift_gen.sv` | leading-one detector and shift values s, 2s+1, 3s+3 |
| `rtl/sf_rotator.sv` | one shift-and-add micro-rotation |
| `rtl/sf_cordic.sv` | iterative CORDIC: registers and control |
| `rtl/octant_unfold.sv` | first octant back to full-turn signed sin/cos |
| `rtl/ddfs_top.sv` | the synthesizer |
| `tb/*_tb.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each also has a watchdog. The testbenches compare the RTL with
independent models, either floating-point `$sin`/`$cos` or a sequential model
of the algorithm written in the testbench, or both:

- `sf_shift_gen_tb` is exhaustive over all 65,536 residual angles.
- `octant_fold_tb` is exhaustive over all 256 phases.
- `sf_cordic_tb` checks about 3,000 angles bit-exactly, to within 64 LSB of
  the true value, and for the exact latency of n+2 clocks.
- `ddfs_top_tb` runs the default-size design with FCW = 00001111b, then
  00111111b, then random FCWs. It checks every sample against
  sin/cos(2·pi·p/256), the sample spacing, and the accumulator. It also counts
  zero crossings against accumulator overflows. Finally, it checks that
  overflow, the 0.25 rad step, all eight octants, saturation and FCW changes
  each occurred at least once.

To simulate, for example, the whole synthesizer:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/ddfs_pkg.sv tb/ddfs_top_tb.sv --top-module ddfs_top_tb
./obj_dir/Vddfs_top_tb
```

Replace `ddfs_top_tb` with any other testbench name. The package file must
come first. Every testbench finishes in well under a second.

## Where the design makes its own choices

The following come from the algorithm as published: the micro-rotation rule,
the shift set (s, 2s+1, 3s+3), the 1/8 cubic term, the start vector (1.0, 0),
iteration at one rotation per clock, the accumulator structure, an 8-bit FCW
and a 16-bit CORDIC. The rest are this design's own choices:

- **Simultaneous update.** Both coordinates are updated from the old
  (x, y), as the rotation equations state. A version that updates y from the
  new x also works, but it is less accurate: for the example angle it gives
  sin 10925 instead of 11224, against an ideal 11202.
- **Sample scheduling.** The fixed sample timer and the one-sample output
  latency are this design's own. So are the start/ready/done handshake of
  `sf_cordic` and the synchronous active-low reset.
- **Phase hand-over.** The phase goes to the CORDIC once per sample, and the
  accumulator simply wraps on overflow. A synthesizer that handed over a phase
  only at each overflow would produce one sample per turn. It could not make
  a sine wave.
- **Octant folding.** The folding method, the radian scaling constant and the
  signed, saturated output format are this design's own. So is the choice
  that the CORDIC receives all N phase bits.
- **Sizes.** The accumulator width equals the FCW width (8). No separate,
  wider accumulator is assumed.

Not included:

- The DAC and the low-pass filter, which are analog.
- A pipelined, table-based CORDIC DDFS, which serves only as a point of
  comparison for this design.

For reference, the published FPGA figures for this architecture on a
Spartan-3E are 355 slices, 160 flip-flops, 624 four-input LUTs and
52.28 MHz. The RTL here holds 132 flip-flops.
