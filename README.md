# Long-range electrostatics accelerator (particle-mesh, single FPGA)

This RTL computes the long-range part of the Coulomb force on every particle of
a periodic molecular-dynamics system. It does this with a particle-mesh method
built around one idea: a grid memory split into 64 interleaved banks, so that
the 64 grid points a particle touches can all be read and written in one clock
cycle. One iteration runs five steps:

1. **Charge mapping.** Each particle's charge is spread over the 4×4×4 grid
   points around it, using third-order basis functions of its offset from its
   floor grid point.
2. **Forward 3D FFT.** The charge grid is transformed one dimension at a time
   (X, Y, Z). During the Z pass every point is also multiplied by a Green's
   function table.
3. **Inverse 3D FFT.** The result is transformed back (Z, Y, X), giving a
   potential grid.
4. **Force interpolation.** For each particle, the same 4×4×4 box of
   potentials is multiplied by basis coefficients in which one dimension uses
   the derivative polynomials. The 64 products are summed to give the force in
   X, Y and Z.
5. **Offload.** Forces go out to the host in particle order.

One particle is handled per clock cycle in charge mapping and in force
interpolation. Sixty-four FFT pipelines run in parallel during the FFT passes.
The default build is a 32×32×32 grid with up to 32,768 particles.

## Block map

```
 host --p_*--> particle_info_mem --> coeff_gen (charge) --> charge_accum --+
                     |                                                     |
                     +--> coeff_gen (dX, dY, dZ) --> force_mac x3          v
                                                        ^          cluster_mem (64 banks)
                                                        |                ^   |
 host <--f_*-- force_fifo <-----------------------------+                |   v
                                       greens_rom --> green_conv <-- fft_pipeline x64

 lr_sequencer drives every address, enable and phase.
```
| file | role |
|---|---|
| `rtl/lr_pkg.sv` | number formats, constants, fixed-point helpers |
| `rtl/particle_info_mem.sv` | particle cache, ready/valid/last load port |
| `rtl/coeff_gen.sv` | basis-function evaluation, 64 weights per particle (4 instances) |
| `rtl/cluster_mem.sv` | 64-bank grid memory with toroidal-shift alignment |
| `rtl/charge_accum.sv` | read-modify-write adders for charge mapping |
| `rtl/fft_pipeline.sv` | streaming 1D FFT, natural order (64 instances) |
| `rtl/greens_rom.sv` | Green's function table, same banking as the grid |
| `rtl/green_conv.sv` | multiply by the Green's function in the Z pass |
| `rtl/force_mac.sv` | 64 multipliers + 6-level adder tree (3 instances) |
| `rtl/force_fifo.sv` | force output buffer |
| `rtl/lr_sequencer.sv` | phases, schedules, hazard stalls, credits |
| `rtl/lr_top.sv` | top level |

## The clustered grid memory

This is the part everything else depends on.

**Banks and addresses.** A grid point (x, y, z) is stored in bank
`n = x[1:0] + 4·y[1:0] + 16·z[1:0]` (its *neighbour ID*). The address inside
that bank is `{z_hi, y_hi, x_hi}`, the *neighbourhood ID*. Any 4×4×4 box of
consecutive points, aligned or not, therefore hits every bank exactly once.

**Ports and shifts.** The 64 access ports are also numbered
`p = px + 4·py + 16·pz`. Port p of a box starting at (bx, by, bz) must reach
bank `((px+bx)%4) + 4·((py+by)%4) + 16·((pz+bz)%4)`. That is a rotation by
`b mod 4` along each dimension.

**The alignment network.** `cluster_mem` does the rotations with three
pipelined shift stages (X, then Y, then Z) on the way to the banks. Read data
comes back through three reverse stages, so each port gets its own point.

**Latency.** A read takes 7 cycles: 3 shift stages, 1 bank read, 3 shift
stages. A write is stored 4 cycles after its request. Reads issued from the
next cycle on see it.

**Shift rule (own simplification).** One shift is applied per dimension for
the whole cluster, instead of routing each port on its own. Every access
pattern the sequencer makes is a pure rotation, so nothing is lost.

The Green's table (`greens_rom`) reuses the same memory at 32 bits per point.
It is filled through a load port before the first iteration. A 1 Mbit image
would be too big to ship as a memory file, and the values depend on the box
size and Ewald parameter the host uses.

## FFT passes and slice staggering

**One pass.** A pass along dimension D uses all 64 pipelines. The ports form
four 2D slices of 16 ports each, and slice k holds the ports with coordinate k
along D. Each slice streams a 4×4 bundle of grid lines into its 16 pipelines,
one point per line per cycle, then moves on to its next bundle.

**Staggering.** If all slices started together, all four would need the same
bank column along D in the same cycle. So slice k starts `(4−k) mod 4` cycles
after slice 0. At any cycle the four slices then use four different bank
positions along D, and the whole access is a single rotation by `t mod 4`
along D. Writes use the same schedule, delayed by the read latency, the FFT
latency, and in the Z pass one more cycle for the Green's multiply.

**Pass length.** One pass takes

    NG/64 + 3 + 7 + FFT latency (+1 in the Z pass) + 6 cycles

At 32³ that is 512 + 3 + 7 + 69 + 6 = 597 cycles (598 for the Z pass), and
3,583 cycles for all six passes.

**Inverse passes.** These use the same forward pipelines. Real and imaginary
parts are exchanged before and after the transform, since
IDFT(x) = swap(DFT(swap(x))).

**Scaling.** Forward passes halve after every butterfly stage, so they compute
X/N and cannot overflow. Inverse passes are unscaled. Together this is the
usual 1/N normalisation of a transform pair. The inverse does not throw away
the low bits of the potential. There is nothing to divide at the end, so any
constant factor belongs in the Green's table.

**The FFT core.** `fft_pipeline` is a radix-2 single-path delay-feedback
pipeline followed by a double-buffered bit-reversal stage. Its latency is
`LOGN + 2·2^len` cycles (69 at length 32). It accepts a length below the
maximum by bypassing its first stages.

## Charge mapping and hazards

**Flow.** Each particle is read from the particle cache. `coeff_gen` turns its
offsets and charge into 64 weights in 6 cycles. The box is read from the grid
memory (7 cycles), `charge_accum` adds the weights, and the box is written
back. A write request comes 8 cycles after the particle is issued.

**Hazard stall.** If a particle's box overlaps, toroidally, the box of any
particle issued in the previous 8 cycles, its read would miss a pending
write. The sequencer then holds the particle: the `cm_stall` output is high,
and no particle is issued that cycle. Sorting or interleaving the particles
on the host reduces these stalls.

**Clearing.** The grid is cleared one point per accepted particle while
particles load. If fewer particles than grid points arrive, an extra CLEAR
phase clears the rest, one point per cycle.

## Force interpolation and back-pressure

**Coefficients.** Three more `coeff_gen` instances use the derivative
polynomials in X, Y or Z. Their weights are multiplied by the potential box
(the real part of the grid) in `force_mac`: one multiply stage plus six adder
levels, 7 cycles in all. A force reaches the output buffer about 15 cycles after its
particle is issued.

**Back-pressure.** A slow host is handled by credits. A particle is issued
only if (forces in flight + forces buffered) < `FIFO_DEPTH`, so the output
buffer can never overflow and the pipeline itself never stalls.
`FIFO_DEPTH = 32` is deeper than that latency, so a ready host gets one
force per cycle.

**Output value.** The force output is `Σ potential · q · ∂basis/∂offset` per
dimension. The sign and the 1/grid-spacing factor of a physical force are
left to the host.

## Basis functions

For an offset `o` in [0, 1) from the floor grid point, grid points
floor−1 … floor+2 get these weights:

| i | φᵢ(o) | dφᵢ/do |
|---|---|---|
| 0 | −½o³ + o² − ½o | −³⁄₂o² + 2o − ½ |
| 1 | ³⁄₂o³ − ⁵⁄₂o² + 1 | ⁹⁄₂o² − 5o |
| 2 | −³⁄₂o³ + 2o² + ½o | −⁹⁄₂o² + 4o + ½ |
| 3 | ½o³ − ½o² | ³⁄₂o² − o |

Both tables are parameters of `coeff_gen`, given as {c3, c2, c1, c0} rows.
Generate statements drop multipliers whose coefficient is 0 and use a plain
register where it is 1. A different interpolation scheme is therefore only a
parameter change.

## Number formats

| quantity | format |
|---|---|
| offset | unsigned Q0.27 per dimension |
| charge | signed Q5.27 |
| basis weights, coefficients | 32-bit, 27 fraction bits |
| grid point | 64 bits: real and imaginary 32-bit halves, 24 fraction bits |
| Green's value | 32-bit, 24 fraction bits |
| twiddles | 32-bit, 30 fraction bits |
| force | 32-bit, 24 fraction bits, saturated |

All products are truncated toward −∞. The grid has 7 integer bits.
Potentials must stay below ±128, and the Green's table should be scaled with
that in mind.

## Interfaces and timing of `lr_top`

**Particle input.** Signals: `p_valid`, `p_ready`, `p_last`, then
`p_ix/iy/iz` (floor grid point), `p_ox/oy/oz` and `p_q`. Loading the set,
ended by `p_last`, starts an iteration.

**Force output.** Signals: `f_valid`, `f_ready`, `f_last`, `f_x/f_y/f_z`.
Forces come out in the order the particles were loaded.

**Green's load.** `g_ld_en` with `g_ld_x/y/z` and `g_ld_data`, one value per
cycle. Load every point before the first iteration.

**Status.** `phase` (0 load, 1 clear, 2 charge map, 3 FFT, 4 force),
`fft_pass` (0..5) and `cm_stall`.

**Reset.** `rst_n` is asynchronous and active low. It resets control state
only; memories are not cleared by reset.

**Cycle count.** An iteration with P particles on an NG-point grid takes:

- load: P cycles (host permitting);
- clear: max(0, NG − P) cycles;
- charge mapping: P cycles, plus hazard stalls, plus a short drain;
- FFT: 6 passes as above;
- force: P cycles, plus about 16 cycles of latency.

At 32³ with 32,768 uniformly random particles the simulation measures:

| phase | cycles |
|---|---|
| load | 32,770 |
| charge mapping | 262,495 (of which 243,720 are stalls) |
| FFT | 3,583 |
| force | 32,783 |

Random particles stall a lot, because on a 32³ grid a particle's box often
overlaps the box of one of the previous eight particles. Without stalls, charge
mapping takes P cycles plus the drain. Loading the particles in an order where
consecutive ones are far apart removes most of the stalls.

## Departures from the source design

- **Arithmetic.** Fixed point replaces single-precision floating point
  throughout, using the formats above. The floating-point latencies (and
  the run-time formulas built from them) therefore do not apply.
- **FFT core.** The FFT is this design's own R2SDF pipeline, not a vendor
  core. The inverse is done by swapping real and imaginary parts, not by
  reordering outputs. Forward passes scale by 1/N and inverse passes do not.
- **Derivative of φ₁.** It is 9⁄2·o² − 5o, with no constant term, because it
  must be the true derivative of φ₁ (the four derivatives sum to zero).
- **Green's table.** The table is loaded through ports, not preprogrammed.
- **Alignment routing.** The network applies one shift per dimension instead
  of per-port routing.
- **Clearing.** The extra CLEAR phase lets an iteration have fewer particles
  than grid points.
- **Back-pressure.** Force output back-pressure uses a credit-counted buffer.
- **Build size.** The grid size is fixed at build time. The 16³ / 4,096
  configuration is a separate build (`LGX=LGY=LGZ=4`, `NPART=4096`).

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Irtl rtl/lr_pkg.sv rtl/cluster_mem.sv \
    tb/tb_cluster_mem.sv --top-module tb_cluster_mem
./obj_dir/Vtb_cluster_mem
```

End-to-end tests need every file in `rtl/` (package first), plus
`tb/lr_tb_env.sv` and the wrapper:

- `tb_lr_top`: 8×8×8 grid, 100 and then 600 particles; takes well under a
  second.
- `tb_lr_full`: the default 32×32×32 build, 2,000 and then 32,768 particles;
  takes a few seconds.

Both compare every force against a floating-point model of the same algorithm
(a separable DFT, not an FFT). Both also require that each mechanism happened
at least once: hazard stalls, the clear phase, output back-pressure, the
Green's pass and the inverse passes. They check the cycle count of every FFT
pass and bound the cycles of charge mapping and force computation.

The unit tests check their blocks against independent models:

- `coeff_gen` against the polynomials evaluated in floating point;
- `cluster_mem` and `greens_rom` against a plain array, at exact latency;
- `fft_pipeline` against a direct DFT, including latency and the unscaled
  mode;
- `lr_sequencer` by decoding every memory request back to grid points.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NPART` | 32768 | particle capacity |
| `LGX`, `LGY`, `LGZ` | 5 | log2 grid size per dimension (tested at 3 and 5) |
| `FIFO_DEPTH` | 32 | force output buffer depth; keep it above the ~15-cycle force latency for full rate |

The grid memory holds `2^(LGX+LGY+LGZ)` × 64 bits, and the Green's table half
that. At the default size this is 2 Mbit + 1 Mbit, plus 4 Mbit of particle
cache.
