# CORDIC quadrature mixer

A digital quadrature mixer multiplies each input sample r(k) by cos(φ(k)) and
sin(φ(k)) of a numerically controlled carrier. The usual circuit has a
sine/cosine table (a direct digital synthesizer) and multipliers after it. This
design leaves out the table and the multipliers. Multiplying the vector
(r, 0) by the pair (cos φ, sin φ) is the same as rotating that vector by the
angle φ. A CORDIC rotator does that rotation with adders and fixed shifts
only. So one shift-and-add array both makes the carrier and mixes it in, and
it is about a third of the area of a table-plus-multiplier mixer with the same
output precision.

```
              freq_word            phase_offset (θ)
                  │                      │
            ┌─────▼──────────────────────▼─────┐
            │ phase_accumulator                │  acc += freq_word per sample
            │   phase = acc[top B_C bits] + θ  │
            └───────────────┬──────────────────┘
                            │ B_C-bit binary angle
            ┌───────────────▼──────────────────┐
            │ cordic_rotator                   │
            │  cordic_angle_computation        │  phase → direction bits
            │        │ d_pre, d[0..n-1]        │
x_in (L) ──►│  cordic_angle_rotation           │  ±90° mux + n shift/add stages
y_in (L) ──►│                                  │──► x_out, y_out (N_C)
            └───────────────┬──────────────────┘
                            ▼
                output register → i_out, q_out, out_valid
```

The top is `cordic_quadrature_mixer`. It takes a real input (`y_in = 0`),
which gives `i_out ≈ G·r·cos φ` and `q_out ≈ G·r·sin φ`. It also takes a
complex input (`x_in + j·y_in`). Then it works as a single-sideband complex
mixer: `i_out + j·q_out ≈ G·(x_in + j·y_in)·e^{jφ}`.

## Word-lengths and parameters

Four numbers set the precision and the cost:

| parameter  | meaning                                         | default |
|------------|-------------------------------------------------|---------|
| `L`        | input (A/D) word-length                         | 10      |
| `B_C`      | phase word-length after the accumulator         | 17      |
| `N_STAGES` | number of CORDIC elementary rotations, n        | 12      |
| `N_C`      | word-length of the rotation datapath and output | 16      |
| `ACC_W`    | phase accumulator width (frequency resolution)  | 32      |
| `PIPELINED`| register after every CORDIC stage               | 0       |
| `FOLD`     | >1: iterative rotator, one sample per FOLD cycles | 1     |
| `HEADROOM` | integer bits above the input in the datapath    | 2       |

Each input precision has a cost-optimal set of the first four numbers. These
sets give an output error of at most half an input LSB, after the mixer gain
is divided out:

| L  | B_C | n  | N_C |
|----|-----|----|-----|
| 4  | 10  | 6  | 9   |
| 5  | 11  | 7  | 10  |
| 6  | 12  | 8  | 11  |
| 7  | 13  | 9  | 13  |
| 8  | 14  | 10 | 14  |
| 9  | 15  | 11 | 15  |
| 10 | 17  | 12 | 16  |

Demodulators sized by a symbol-error-rate target (10⁻⁵) need less precision:

| modulation | L | B_C | n | N_C |
|------------|---|-----|---|-----|
| QPSK       | 5 | 7   | 6 | 6   |
| QAM16      | 6 | 8   | 7 | 7   |
| QAM64      | 7 | 9   | 8 | 8   |

The defaults are the largest row, L = 10. Every other row fits inside it.
You can also set the parameters to a row to get its exact cost. Every row of
the per-modulation table has N_C = L + 1, so it needs `HEADROOM = 1` (see
below). The
accumulator width `ACC_W` is not part of these tables. It sets only the
frequency step, which is f_sample / 2^ACC_W.

## Angles as binary fractions of a turn

All angles are binary angles: a `B_C`-bit word spans one full turn, so 2^B_C
stands for 2π. Read as two's complement, the phase lies in [−π, π). In this
form the steps that CORDIC takes first cost no adder:

* **Pre-rotation by ±90°.** The CORDIC stages with shifts 2^0 … 2^−(n−1)
  converge only for angles within about ±99.9°. The angle rotation block
  therefore starts with a multiplexer. It maps (x, y) to (−y, x) for +90°, or
  to (y, −x) for −90°. The choice is the sign bit of the phase: a phase ≥ 0
  gets +90°. The residual angle is then z − 90° or z + 90°, which lies in
  [−90°, 90°). In binary angles, either result is the low `B_C−1` bits of the
  phase with bit `B_C−2` inverted.
* **The 2^0 stage (±45°).** 45° is 2^(B_C−3) exactly. Subtracting or adding
  it, by the sign of the residual, again comes down to inverting one bit. The
  result fits in `B_C−2` bits.
* **Stages 1 … n−2.** These stages add or subtract the constant
  atan(2^−i), rounded to a binary angle. Each needs an adder of `B_C−2` bits:
  `B_C−3` magnitude bits plus a sign.
* **Last stage.** Only the sign of its input residual is needed. No residual
  is computed after it.

So the angle computation block holds n−2 adders, each adding one of two fixed
values. Every direction bit is the inverted sign bit of the residual at that
stage: 1 means rotate counter-clockwise. The constants are computed at
elaboration time by `cordic_pkg::elem_angle`. It evaluates the series
atan(x) = Σ (−1)^k x^(2k+1)/(2k+1) for x = 2^−i in 128-bit fixed point,
scales by 2^B_C/(2π) and rounds to the nearest integer. No real numbers
reach synthesis.

## The rotation datapath

Stage i (i = 0 … n−1) computes:

```
d[i] = 1:  x' = x − (y >>> i),   y' = y + (x >>> i)
d[i] = 0:  x' = x + (y >>> i),   y' = y − (x >>> i)
```

That makes 2·n adder/subtractors of `N_C` bits, with shifts that are only
wiring.

**Number format.** The L-bit input sits in the N_C-bit word with `HEADROOM`
spare bits above it. The remaining `N_C−L−HEADROOM` bits below the input are
guard bits. They soak up most of the truncation error of the shifts. Shifted
operands are truncated (floor). The shifts are not rounded.

How much headroom an input needs depends on its size:

* The CORDIC gain is K = Π√(1+2^−2i) ≈ 1.6468. For a full-scale complex
  input, K·√2 stays below 4. So the default `HEADROOM = 2` can never
  overflow.
* For a real input, K alone stays below 2, so one bit is enough. The same is
  true of a complex input whose magnitude stays below 2^(L−1).
  `HEADROOM = 1` gives you one more guard bit in those cases. The
  per-modulation sizes depend on that extra bit.
* If the datapath is narrower than `L + HEADROOM`, the low input bits are
  dropped.

**Gain.** A constant gain does no harm in a mixer, so no stage removes it.
An output LSB equals 2^−(N_C−L−HEADROOM) input LSBs, and the signal is
multiplied by K. With the defaults, G = K·2² ≈ 6.587.

**Precision.** At the default sizes, the largest error seen in random tests is
0.41 input LSB. That figure is measured against an exact rotation by the same
quantised phase, after dividing by G. It stays within the 0.5 LSB the
word-lengths are chosen for.

## Interface and timing

| port            | dir | width   | meaning |
|-----------------|-----|---------|---------|
| `clk`, `rst_n`  | in  | 1       | clock; asynchronous active-low reset (clears the phase and the outputs) |
| `in_valid`      | in  | 1       | a sample is present; the phase advances when it is accepted |
| `in_ready`      | out | 1       | the sample is accepted this cycle (always 1 unless `FOLD > 1`) |
| `x_in`, `y_in`  | in  | L       | input sample, two's complement (`y_in = 0` for a real input) |
| `freq_word`     | in  | ACC_W   | carrier frequency = freq_word / 2^ACC_W × sample rate |
| `phase_offset`  | in  | B_C     | phase added to the carrier (for a carrier-recovery loop) |
| `out_valid`     | out | 1       | `i_out`, `q_out` hold a result |
| `i_out`,`q_out` | out | N_C     | rotated sample, gain G included |
| `phase_wrapped` | out | 1       | the accumulator wrapped on its last update |

The sample presented with `in_valid` is rotated by
φ(k) = acc(k)[ACC_W−1 : ACC_W−B_C] + phase_offset. Then the accumulator
steps to acc(k) + freq_word. The first sample after reset sees phase 0 plus
the offset. A positive `freq_word` turns the vector counter-clockwise. To
shift a carrier at f down to baseband, use `freq_word = 2^ACC_W − f`.

* `PIPELINED = 0` (default): the rotator is one combinational array and the
  result is registered. Latency is 1 cycle. The critical path runs through
  all n stages. Carries ripple from stage to stage in the rotation block, and
  each direction bit must wait for the previous residual.
* `PIPELINED = 1`: both blocks get a register after the pre-rotation and after
  each stage except the last. The angle block's registers line up with the
  rotation block's, so stage i sees the direction bit of the sample it holds.
  Latency is n + 1 cycles. The clock period drops to about one stage, and the
  throughput is still one sample per cycle.
* `FOLD > 1`: the iterative rotator described below. `in_ready` drops for
  FOLD−1 cycles after each accepted sample. Latency is FOLD cycles.

`i_out` and `q_out` are meaningful only while `out_valid` is high.

## Iterative form for slower sample rates

A mixer rarely has to run at the full speed of the unrolled array. CORDIC is
an iterative algorithm, so it can trade throughput for area. A table-based
mixer cannot do that, because its tables must stay full size.
`cordic_rotator_iterative` builds only S = ⌈n/FOLD⌉ stages and runs them FOLD
times per sample. In pass p, hardware stage j performs elementary rotation
i = p·S + j. Its shift therefore becomes a barrel shifter, and its angle
constant comes from a small table indexed by i. The residual angle is kept
in `B_C−1` bits, and every stage, including the 45° one, uses its adder. The
bit-inversion trick works only where one stage is fixed to one elementary
angle, so it cannot be used here.

The schedule runs as follows:

* In the cycle a sample is accepted, the ±90° pre-rotation and pass 0 act
  directly on the inputs.
* Passes 1 … FOLD−1 then act on the registered state.
* The last pass drives the result combinationally, with `out_valid`.

The results are bit-identical to the parallel rotator. With `FOLD = 2` the
stage adders are halved. Part of that saving goes to the shifters and
multiplexers.

## Files

| file | contents |
|------|----------|
| `rtl/cordic_pkg.sv` | elementary-angle constant function |
| `rtl/phase_accumulator.sv` | frequency accumulator, truncation, phase offset |
| `rtl/cordic_angle_computation.sv` | direction bits from the phase |
| `rtl/cordic_angle_rotation.sv` | ±90° multiplexer and shift/add stages |
| `rtl/cordic_rotator.sv` | the two blocks joined |
| `rtl/cordic_rotator_iterative.sv` | folded rotator, FOLD passes per sample |
| `rtl/cordic_quadrature_mixer.sv` | top: accumulator, rotator, output register, valid |
| `tb/tb_cordic_ref_pkg.sv` | reference models: integer CORDIC with full-width angles, exact rotation in reals |
| `tb/tb_*.sv` | one self-checking testbench per module, plus a full-size end-to-end test |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. The reference model in `tb_cordic_ref_pkg` does not copy the RTL's
tricks. It keeps the residual angle as a full-width integer and really adds
±90° and ±45°. It takes the elementary angles from `$atan` at run time.

* `tb_cordic_angle_computation`: tries every phase of a 10-bit, 7-stage
  block, and random phases at full size. It also checks the pipelined form's
  direction timing, and that the encoded angle matches the phase to within
  the last elementary angle.
* `tb_cordic_angle_rotation`: uses random vectors and directions, including
  the most negative inputs. It also covers a narrow datapath
  (`N_C < L+2`) and a single headroom bit, and checks the pipelined latency
  of n cycles.
* `tb_cordic_rotator`: checks results bit-exactly against the reference and
  against the 0.5 LSB error bound, in all four quadrants, in both forms.
* `tb_cordic_rotator_iterative`: runs FOLD = 2, 3 and 5 (the last with a
  partly used final pass) on random streams that ignore `in_ready`. Results
  are checked bit-exactly, and the test checks the latency, the spacing of
  accepted samples, and the throughput.
* `tb_cordic_mixer_workloads`: runs the mixer at every size in the two
  tables above.
  * For the seven precision rows, random full-scale complex samples are
    rotated by random phases. The normalised error must stay within 0.5 LSB.
    The measured maxima are 0.455, 0.450, 0.492, 0.457, 0.452, 0.484 and
    0.407 for L = 4 … 10.
  * For the QPSK, QAM16 and QAM64 rows, random symbols on a complex carrier
    are brought down to baseband with `HEADROOM = 1`. All 4000 symbols of
    each must be decided correctly. The inputs are noise-free, and the
    resulting output SNRs are 21.5, 26.3 and 31.0 dB.
  * Symbol-error rates with a noisy input are not measured.
* `tb_phase_accumulator`: compares the unit cycle by cycle with a 64-bit
  model. It covers random enables, wrap-arounds and offsets.
* `tb_cordic_quadrature_mixer`: runs the default, pipelined and FOLD = 2
  mixers side by side. The stimulus is a random stream with sample gaps,
  frequency changes, phase offsets and real and complex inputs. Every output is checked
  bit-exactly, against the error bound, and for latency. It then shifts a
  real carrier A·cos(ωk + p) down to baseband. The averaged output must be
  (A/2)·e^{j(p + φ₀)} within 1 LSB in magnitude and 0.01 rad in angle, where
  φ₀ is the carrier phase at the start. The test also counts the gaps, wraps,
  both pre-rotation directions, offsets, complex inputs and pipelined
  outputs. It also counts iterative outputs and samples held back by
  `in_ready`, and fails if any of these never happened.
* `tb_cordic_quadrature_mixer_full_size`: the same end-to-end run on a single
  instance with all parameters at their defaults.

To run one with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cordic_pkg.sv tb/tb_cordic_ref_pkg.sv rtl/phase_accumulator.sv \
  rtl/cordic_angle_computation.sv rtl/cordic_angle_rotation.sv \
  rtl/cordic_rotator.sv rtl/cordic_rotator_iterative.sv \
  rtl/cordic_quadrature_mixer.sv \
  tb/tb_cordic_quadrature_mixer.sv --top tb_cordic_quadrature_mixer
./obj_dir/Vtb_cordic_quadrature_mixer
```

Each run takes well under a second.

## Where this RTL goes beyond, or differs from, the architecture

What is fixed by the architecture: the phase accumulator truncated to `B_C`
bits feeds an n-stage CORDIC rotator in rotation mode, with an `N_C`-bit
datapath. The rotator has a multiplexer first stage and shifts 2^0 …
2^−(n−1). The first and last stages do no angle arithmetic, leaving n−2 angle
adders. No gain correction is applied. The word-length tables above belong to
the architecture as well.

The following are this implementation's own choices:

* the binary-angle encoding and the bit-inversion form of the first two steps
* where the input sits in the datapath, with `HEADROOM` bits above it
  (default 2)
* truncation of the shifted operands
* rounding of the elementary angles
* an angle adder of `B_C−2` bits, rather than `B_C−3`, because the extra bit
  holds the residual's sign
* the accumulator width, the `phase_offset` and `phase_wrapped` ports, the
  valid/ready handshake, the reset, and the output register
* the pipeline option. Pipelining was only proposed as a way to speed the
  array up. It is off by default.
* the structure of the iterative form. Only its purpose was given.

Not included:

* the table-plus-multiplier mixer that served as the baseline for cost and
  speed
* the A/D converter and the analog front end
* the low-pass filters, phase detector and loop filter of a carrier-recovery
  loop. `phase_offset` is where such a loop would drive the mixer.
* a carry-save version of the rotation array, which would remove the
  stage-to-stage carry ripple at twice the area
* bit-level pipelining with a fast direction-generation method

Area and delay figures for a 1 µm cell library are not reproduced here. The
synthesis cell counts of this RTL can be compared with them only loosely.
