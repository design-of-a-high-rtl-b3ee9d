# 2048-point single-precision FFT with adaptive-CORDIC twiddle multipliers

This is a pipelined, streaming 2048-point FFT that works entirely in IEEE-754
single precision. A radix-2 FFT spends most of its hardware on the twiddle
multiplications. In this design each twiddle multiplication is a rotation by
the angle -2πj/M, done with a floating-point CORDIC instead of four
floating-point multipliers. A plain CORDIC walks through every entry of its
angle table, which is slow when each step is a floating-point addition. The
*adaptive* CORDIC used here picks only the few table angles that bring the
residual angle closest to zero. A typical twiddle needs five or six rotations
instead of sixteen.

The transform is a radix-2 decimation-in-frequency pipeline in the
multi-path delay commutator (MDC) style. It has eleven stages. Nine of them
carry an adaptive CORDIC. The 4-point stage multiplies only by 1 or -j, and
the 2-point stage has no multiplier at all. Real samples go in, one per
handshake. Complex spectrum values come out in bit-reversed order, each
tagged with its frequency index.

The architecture, the angle-selection rule and the three angle-table sizes
(16, 8, 4) follow a published FPGA design. The RTL, the handshakes and the
corner-case arithmetic are this implementation's own. The departures are
listed under "Where this implementation departs from the original design"
below.

## The adaptive CORDIC (`acordic`)

### Angle selection (`rot_sel`)

The table holds θᵢ = atan(2⁻ⁱ) for i = 0…15, together with thresholds that
lie halfway between neighbouring angles:

    c_i = (θ_i + θ_(i+1)) / 2      for i = 0 … 14
    c_15 = θ_15 / 2

For a residual angle z, the unit rotates by θᵢ in the direction of sign(z),
choosing the i for which c_i < |z| ≤ c_(i-1). Any |z| above c_0 selects θ₀.
It stops when |z| ≤ c_(L-1), where L is the table size. Each step leaves a
residual of at most about half the chosen angle. So the chosen index rises
strictly, and no more than L rotations are ever needed. Example: 15° becomes
θ₂ + θ₆ + θ₁₀ + θ₁₂ − θ₁₅ = 14.99961°, which takes five rotations. A
conventional CORDIC needs all sixteen and ends at 15.00089°.

The smaller tables (8 and 4 entries) are the first L entries of the same
table. They keep the threshold c_(L-1) = (θ_(L-1) + θ_L)/2 as the stop
value. This stop value fixes the accuracy: the worst residual angle is
0.336° for 8 entries and 5.35° for 4 entries. These give worst-case relative
errors of 5852 ppm and 92464 ppm, which is what the simulations measure.

Angles are 32-bit two's-complement binary angles, where 2³² stands for 360°.
The tables in `fft_pkg` are these θᵢ and cᵢ converted and rounded:
θᵢ·2³²/360.

### Datapath

| unit | what it does each clock |
|---|---|
| `falu_xy` | x ← x − s·y·2⁻ⁱ, y ← y + s·x·2⁻ⁱ. The 2⁻ⁱ is an exponent decrement, so a step is two floating-point additions. |
| `fmul_ki` | K ← K·kᵢ, where kᵢ = cos(atan 2⁻ⁱ). Because angles are skipped, the gain correction is not a constant. It is accumulated over the rotations actually made. |
| `fmulk_norm` | At the end, x·K and y·K, normalised back to IEEE-754 single. |

K is a bare 24-bit unsigned mantissa with 1 integer bit and 23 fraction
bits. No sign or exponent is needed, because 0.6 < K ≤ 1.

The table angles only add up to about 99.9°, but twiddle angles span
0…−180°. So the input angle is first folded into [−45°, 45°). The fold is an
exact multiplication by a power of j: swap the real and imaginary parts and
flip sign bits.

### Timing

The unit holds one operation at a time:

- the accept edge;
- one clock per rotation (at least one clock); the last rotation also sees
  that the new residual is within the stop threshold;
- one clock to scale by K.

`out_valid` therefore comes max(n,1)+1 clocks after the accept. The next
operand is accepted during the scaling clock, so operations can follow every
max(n,1)+1 clocks. Over the 1024 twiddle angles of a 2048-point FFT, this
comes to about 6.3 clocks per twiddle with the 16-entry table.

## Floating-point arithmetic (`fp_pkg`)

`fp_add` is a one-cycle combinational IEEE-754 single adder:

- swap the operands by magnitude;
- align the smaller one with guard, round and sticky bits;
- add or subtract, then renormalise with a leading-zero count;
- round to nearest even.

Subnormal inputs read as zero, and subnormal results are flushed to zero. An
exponent overflow gives infinity. NaN is not handled. `fp_butterfly` uses
four of these adders, and `falu_xy` uses two.

## The delay-commutator stage (`mdc_stage`)

A stage with block size M pairs sample j with sample j + M/2. Per block, it
runs the four transactions of the MDC stage:

1. The first M/2 samples go into **Shift_reg1**.
2. The next M/4 samples each meet their partner from Shift_reg1 in the
   butterfly. The **sum** leaves at once on output lane A. The
   **difference** goes through the twiddle multiplier into **Shift_reg2**,
   which holds M/4 values.
3. During the last M/4 butterflies, sums keep leaving on lane A. At the same
   time, Shift_reg2 passes its older twiddled differences out on lane B.
4. Shift_reg2 empties on lane B.

Lane A of a stage thus carries the sum half-block and lane B the twiddled
difference half-block: exactly the two M/2-blocks the next stage must
transform. The next stage receives both lanes at once and handles blocks in
the order A, B, A, B, …:

- Lane A's block is paired first.
- The first half of lane B's block enters Shift_reg1 as lane A's partners
  leave it. In the same clock, one lane can write Shift_reg1 while the other
  feeds the butterfly; this is the `dual_xfer` strobe.
- Only then is lane B's block paired.

Two turn bits (`push_turn_b`, `pair_turn_b`) enforce this order. Without
them, a fast lane A could write the next block into Shift_reg1 ahead of lane
B's block.

Every lane is a valid/ready stream, and the stage simply holds when anything
downstream is busy. That happens constantly, because the CORDIC takes several
clocks per difference. Shift_reg1 and Shift_reg2 are therefore FIFOs (circular
buffers in memory arrays, `shift_reg`) rather than free-running shift
registers. Their order, not their timing, carries the delay-commutator
schedule. Three rules keep the stage from stalling forever:

- A butterfly runs only if Shift_reg2 has room for its difference. This
  count includes results still inside the CORDIC.
- Shift_reg1 accepts a value in the same clock in which the butterfly frees a
  slot.
- A two-entry `stage_buffer` on each lane between stages absorbs the
  difference values that wait for the next stage's Shift_reg1.

Stage variants are parameters:

| stage | block | `MUL_KIND` | other |
|---|---|---|---|
| 1 | 2048 | adaptive CORDIC | `REAL_INPUT`: imaginary input tied to 0. `DUAL_IN=0`: one input lane. |
| 2–9 | 1024…8 | adaptive CORDIC | |
| 10 | 4 | `mul_neg_j`: twiddle 1 or −j, a swap and a sign flip | |
| 11 | 2 | none | `SERIAL_OUT`: sum then difference on one stream |

The twiddle of pair j in a block of M is exp(−j·2πj/M). It is given to the
CORDIC as the binary angle −j·2³²/M.

## The pipeline (`fft2048`)

`fft2048` chains LOG2N stages (default 11). It places a `stage_buffer` on
each lane between every two stages. These buffers keep every ready signal a
function of a register, so a stall travels back one stage per clock instead
of through a long combinational path.

- **Input:** `in_valid`/`in_ready`/`in_re`, real single-precision samples.
  2048 make one transform; transforms can follow back to back.
- **Output:** `out_valid`/`out_ready`/`out_re`/`out_im`. `out_k` is the
  frequency index k of the current output. Outputs come in bit-reversed
  order, the natural order of a DIF pipeline.
- **Monitoring:** `bf_fire`, `stall_mul` and `dual_xfer` have one bit per
  stage.

Measured at the default parameters, with random integer-valued input in
[−1000, 1000] and an always-ready sink:

| quantity | this RTL | reference design |
|---|---|---|
| 2048-point transform, first input to last output | 14,099 clocks | 12,173 clocks |
| 1024 twiddles through one ACor_16 | 6,426 clocks | 6,621 clocks |
| 1024 twiddles, ACor_8 / ACor_4 | 3,502 / 2,266 clocks | 3,497 / 2,145 clocks |
| ACor max error ratio, 16 / 8 / 4 angles | 15.2 / 5,852 / 92,464 ppm | 22.8 / 5,852 / 92,464 ppm |
| FFT, 16 angles: largest error ratio; rms error / rms output | 3.2·10⁻⁴; 1.7·10⁻⁵ | 4.4 ppm (their scale, input not stated) |

The reference design does not say where its latency count starts, so the
tests allow one frame (2048 clocks) of slack on the FFT latency and 10 % on
the CORDIC throughput.

## Where this implementation departs from the original design

- **Handshakes.** Stages, lanes and the CORDIC use valid/ready, and both
  delay lines are FIFOs. The reference design only says that control signals
  decide each clock whether data moves or holds.
- **Last stage output.** The 2-point stage sends its sum and difference one
  after the other on one stream, so the FFT has a single output port.
- **Quadrant folding** of the CORDIC input angle is added, because the table
  cannot reach angles beyond about ±99.9°.
- **Internal x/y format.** The CORDIC keeps x and y as IEEE-754 words, whose
  hidden bit gives the same 24-bit mantissa the original carries explicitly.
- **Arithmetic corner cases.** Flush-to-zero and no NaN support.
- **No reordering of the output.** Outputs stay in bit-reversed order and
  carry their index.
- **Timing.** The FFT's total latency is about 16 % above the reference
  figure, and the CORDIC's clocks per operation are close to it. There is no
  timing or area result for any FPGA or ASIC process here, only simulation.
- **Inter-stage buffers** hold two entries for every table size. The
  reference design enlarged them for its fastest (4-angle) build.
- **Reset** is synchronous and active low.

## Files

| file | contents |
|---|---|
| `rtl/fp_pkg.sv` | floating-point add/subtract, negate, scale by 2⁻ⁱ |
| `rtl/fft_pkg.sv` | complex type, angle/threshold/gain tables, multiplier kinds |
| `rtl/rot_sel.sv`, `falu_xy.sv`, `fmul_ki.sv`, `fmulk_norm.sv` | adaptive-CORDIC parts |
| `rtl/acordic.sv` | adaptive CORDIC complex multiplier |
| `rtl/fp_butterfly.sv`, `mul_neg_j.sv`, `shift_reg.sv` | stage parts |
| `rtl/mdc_stage.sv` | one MDC stage |
| `rtl/stage_buffer.sv` | two-entry inter-stage buffer |
| `rtl/fft2048.sv` | top |
| `tb/*_tb.sv` | one self-checking testbench per module, plus workloads |
| `tb/tb_fp_pkg.sv`, `tb/mdc_stage_harness.sv` | testbench helpers |

Testbenches: every module has a `<module>_tb.sv`, and in addition:

- `fft2048_tb` runs four 64-point transforms with random stalls on both
  ends.
- `fft2048_full_tb` runs one 2048-point transform at the default parameters.
- `acor_tables_tb` runs the 1024-angle CORDIC workload for 16, 8 and 4
  angles.
- `fft_tables_tb` runs 2048-point transforms with the 8- and 4-angle tables.

Each testbench compares against values computed independently in double
precision, and prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fp_pkg.sv rtl/fft_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv \
        tb/fft2048_full_tb.sv --top-module fft2048_full_tb -Mdir obj
    ./obj/Vfft2048_full_tb

For another testbench, substitute its file and top module. `mdc_stage_tb`
also needs `tb/mdc_stage_harness.sv`. The full-size transform simulates in
well under a minute.

## Changing it

- `fft2048 #(.LOG2N(n))` builds a 2ⁿ-point FFT (n ≥ 3).
- `.NUM_ANGLES(16 | 8 | 4)` trades accuracy for speed. So do other values up
  to 16: the tables are prefixes of one table.
- The CORDIC is iterative. More throughput needs more CORDIC instances per
  stage, or an unrolled CORDIC, in `mdc_stage`'s `g_acor` branch.
- The Shift_reg1 depth M/2 and the Shift_reg2 depth M/4 follow from the
  block size. In the last stage Shift_reg2 holds M/2 values, which is one.
