# Rectangular-to-polar converter on an unfolded CORDIC

A polar transmitter sends the amplitude and the phase of each complex baseband
sample along separate paths, which lets one transmit chain serve several bands
and modulation formats. It therefore needs, for every sample `(x, y)`, the
magnitude `sqrt(x^2 + y^2)` and the phase `atan2(y, x)` at the sample rate.
This RTL computes both with a CORDIC in vectoring mode, unrolled so that every
micro-rotation has its own hardware: a new sample enters every clock cycle,
and neither multipliers nor lookup tables are used. Only adders, constant
shifts and a few multiplexers are needed.

## The datapath

```
 x_in ─┐   ┌──────────────┐ |x|  ┌─────────────────────────┐  K·|v|  ┌──────────────┐
       ├──►│ quadrant map │─────►│ fine angle rotation     │───────►│ scale factor │──► mag_out
 y_in ─┘   │ (coarse)     │  y   │ PE0 → PE1 → … → PE(N-1) │        │   × 1/K      │
           └──────┬───────┘─────►│ z0 = 0                  │   z    ├──────────────┤
                  │ sign x, sign y└─────────────────────────┘───────►│ quadrant     │──► phase_out
                  └───────────────── carried along the pipeline ────►│ correction   │
                                                                     └──────────────┘
```

1. **Quadrant map** (`rpc_quadrant_map`). CORDIC vectoring converges only for
   angles within ±90°. The vector is mirrored into the right half plane by
   replacing `x` with `|x|`; `y` is unchanged. The signs of the original `x`
   and `y` are kept.
2. **Fine angle rotation** (`rpc_fine_angle_rotation`, built from
   `rpc_cordic_pe`). Stage `i` rotates the vector by `±atan(2^-i)`. The
   direction is chosen from the sign of the current `y`, so that `y` is driven
   towards zero:

   ```
   y >= 0:  x' = x + (y >>> i)   y' = y - (x >>> i)   z' = z + atan(2^-i)
   y <  0:  x' = x - (y >>> i)   y' = y + (x >>> i)   z' = z - atan(2^-i)
   ```

   The angle accumulator starts at the constant 0. There are as many stages
   as bits of precision (22 by default). Each stage gains one bit of angle
   resolution. The shifts are by constants, so they are only wiring. After
   the last stage, `z = atan(y/x)` and `x = K·|v|`. Here `K = Π sqrt(1 + 2^-2i) ≈ 1.646760`.
3. **Scale factor** (`rpc_scale_factor`). The gain is constant because the
   number of stages is fixed, so it is removed only once, at the output, by
   multiplying by `1/K`. This multiply is written as a sum of shifted copies
   of the input, one for each set bit of `1/K`, so it uses adders only.
4. **Quadrant correction** (`rpc_quadrant_correct`). The mirroring is undone
   for samples that had `x < 0`. The phase becomes `π − z` if `y ≥ 0` (second
   quadrant) and `−π − z` if `y < 0` (third quadrant).

`rpc_top` connects the four blocks. `rpc_pkg` holds the default sizes and the
functions that compute the constants `atan(2^-i)`, `π` and `1/K` when the
design is elaborated. No table has to be stored.

## Number formats

| signal | format |
|---|---|
| `x_in`, `y_in` | signed, `PRECISION` bits, `FRAC_BITS` = 8 fraction bits |
| `mag_out` | unsigned, `PRECISION` bits, 8 fraction bits |
| `phase_out` | signed radians, `PRECISION` bits, 8 fraction bits, in (−π, π] |
| internal `x`, `y` | signed, `PRECISION + 2 + GUARD_BITS` bits |
| internal `z` | same format as `phase_out` |

The internal x/y path has two more integer bits than the operands. One is
needed because `|−2^(P−1)|` does not fit in `P` bits. The other covers the
CORDIC growth: `K·sqrt(2) < 4`. It also has `GUARD_BITS` = 2 extra fraction
bits. Each stage truncates its shifted operand, so without guard bits the
truncation error builds up over 22 stages. In that case the variance of the
magnitude error is about 4e-5. With two guard bits it drops to about 3.4e-6.
The angle path has no guard bits. Its resolution is 2^-8 rad, so once `i` is
above about 9 the elementary angles round to 0 or 1 LSB. Those stages still
refine the magnitude.

## Timing

- Throughput: one sample per clock cycle. There is no back-pressure.
- Latency: `PRECISION + 2` cycles, which is 24 at the default size. This is
  one register after the quadrant map, one after each CORDIC stage and one at
  the output. `out_valid` follows `in_valid` through the pipeline, and the
  two quadrant signs travel beside the data.
- `REGISTER_STAGES = 0` removes the stage registers. The chain is then
  combinational and the latency is 2 cycles, at the cost of a long path
  through all the adders.
- `rst` is synchronous and active high. It clears only the valid bits, so
  samples in flight are dropped. There are no asynchronous controls.

## Accuracy

These are the measured results at the default size. The reference is
real-valued `sqrt`/`atan2`, and the error variance is taken over a stream of
500 samples with random phase and amplitudes up to 4096.

| quantity | value |
|---|---|
| magnitude error, every sample | within ±4 LSB (LSB = 2^-8) |
| magnitude error variance | 3.4e-6 |
| phase error, vectors ≥ 64 LSB | within ±3 LSB (≈ ±0.012 rad) |
| phase error variance | 8.7e-6 rad² |

The published model of this architecture reports maximum error variances of
7.48e-6 for the magnitude and 3.97e-5 for the phase. It does not give its
input amplitudes, so this comparison is only indicative. Vectors only a few
LSB long get a coarse phase. The phase of the zero vector is meaningless:
the output is whatever the stage constants add up to.

## Parameters of `rpc_top`

| parameter | default | meaning |
|---|---|---|
| `PRECISION` | 22 | operand width; 12 to 22 bits were evaluated for this architecture |
| `FRAC_BITS` | 8 | binary point of all operands |
| `STAGES` | `PRECISION` | number of micro-rotations |
| `GUARD_BITS` | 2 | extra fraction bits of the internal x/y path |
| `REGISTER_STAGES` | 1 | register after every CORDIC stage |
| `GAIN` | 1.646760 | CORDIC gain removed at the output |

At the default size, synthesis gives about 1760 flip-flops. Almost all of
them are the 22 stage registers of `x`, `y`, `z` and `valid`.

## What is specified and what is chosen here

These parts follow the published architecture:
- the four-step structure;
- the unrolled vectoring CORDIC with one stage per bit of precision and a
  zero initial angle;
- the elementary angles `atan(2^-i)`;
- the constant gain 1.646760, applied once at the magnitude output;
- the two quadrant reflections;
- operands of up to 22 bits with 8 fraction bits;
- no multipliers or block memories;
- no asynchronous controls.

These are this design's own choices:
- **Registers.** The architecture is described both as producing its result
  "in one clock cycle" and with a flip-flop count that grows with the
  precision. Here there is a register after every stage, so a result comes
  out every cycle. `REGISTER_STAGES` selects the unregistered version.
  The published FPGA results list 370 to 699 flip-flops for 12 to 22 bits.
  That is fewer than the roughly 1760 of this version at 22 bits, so the
  published implementation probably registers less of the datapath.
- **Guard bits and internal widths.** These are described above. The guard
  bit count is the smallest that meets the published magnitude error
  variance.
- **Arithmetic details.** Shifts truncate (round towards −∞). Zero counts as
  positive when choosing a rotation direction. A vector on the negative `x`
  axis gets the phase +π. The output magnitude is rounded to nearest. The
  angle unit is radians.
- **Handshake.** The `in_valid`/`out_valid` handshake and the synchronous
  reset are this design's own.

## Verification

Every file under `tb/` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops after a fixed number of cycles if
the design hangs.

| testbench | what it covers |
|---|---|
| `rpc_quadrant_map_tb` | `|x|`, `y` and both sign flags, including 0 and `−2^21` |
| `rpc_cordic_pe_tb` | stages 0, 3 and 9 against an exact integer model |
| `rpc_fine_angle_rotation_tb` | 22-stage chain, pipelined and combinational; angle, gain, residual `y`, latency 22, side band |
| `rpc_scale_factor_tb` | `x/K` to within 1 LSB over the output range |
| `rpc_quadrant_correct_tb` | all four sign combinations |
| `rpc_top_tb` | end to end at the default parameters: all quadrants, axes and range limits, streaming with and without gaps, latency 24, reset in mid-stream; fails if any of these cases never occurs |
| `rpc_error_variance_tb` | running magnitude and phase error variance over a 500-sample stream |
| `rpc_precision_sweep_tb` | the converter at 12, 14, 16, 18, 20 and 22 bits, and at 22 bits without stage registers |

How to run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/rpc_pkg.sv \
    tb/rpc_top_tb.sv --top-module rpc_top_tb -o sim
./obj_dir/sim
```

The simulator has only two states, so every register that is read is either
reset or written before use.
