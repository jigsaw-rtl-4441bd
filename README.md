# JIGSAW: stall-free gridding for the non-uniform FFT

Gridding is the expensive step of a non-uniform FFT (NuFFT), for example in
MRI reconstruction from spiral or radial k-space trajectories. Every
non-uniform complex sample is spread onto the W x W uniform grid points around
it, each point getting the sample value times an interpolation-kernel weight
that depends on its distance from the sample. Samples arrive in arbitrary
order, so a processor spends its time on scattered read-modify-writes, and
the usual remedy (binning: pre-sorting samples by grid tile) costs a sort pass
and processes samples near tile edges several times.

This RTL implements JIGSAW, an accelerator that grids a sample stream in a
single pass, with no sorting, at one sample per clock, whatever the sampling
pattern, grid size or window width. A stream of M samples takes M + 12 cycles.

## The Slice-and-Dice idea

Cut the N x N grid into T x T *virtual tiles* (T = 8) and stack the tiles on
top of each other: the stack is the *dice*. A *column* of the dice is one
relative position (x, y) in [0, T)^2, taken in every tile. JIGSAW has one
pipeline per column, T x T = 64 pipelines, and each pipeline keeps the grid
points of its column in a private SRAM, one entry per tile.

Because the window is never wider than a tile (W <= T), a sample reaches **at
most one point in every column**. So every sample can be broadcast to all 64
pipelines at once; each decides on its own whether it is hit and where, and
no two pipelines ever touch the same memory. There is nothing to arbitrate and
nothing to stall on.

Which point of the column? Split each sample coordinate c into a *tile
coordinate* (c / T, the upper bits) and a *relative coordinate* (c mod T, the
lower bits with the fraction). For the pipeline owning column p (per
dimension):

* forward distance `d = (rel + T - p) mod T`;
* the column is hit when `d < W` in both dimensions;
* if `floor(rel) < p` the hit point is in the *previous* tile: the tile
  coordinate is decremented, and tile 0 wraps to tile N/T - 1 because the
  frequency-domain grid is periodic (a torus);
* the SRAM entry is the global tile address `ty * (N/T) + tx`;
* the kernel weight comes from a table indexed by `round(d * L)`, where L (a
  power of two) is the table oversampling factor, so the multiply is a shift.

In other words, a sample at c reaches exactly the grid points g with
`0 <= (c - g) mod N < W` in each dimension. The weight table stores the half
of the symmetric kernel from its centre outwards: entry a holds the weight at
distance a / L from the centre, and the address used is
`|round(d * L) - W*L/2|`, clamped to the last entry (255). The window is
therefore centred at c - W/2; a host that wants it centred on the sample adds
W/2 to every coordinate before sending it.

## The pipeline (`jigsaw_pipeline`)

| stage | module | cycles | what it does |
|---|---|---|---|
| broadcast | `jigsaw_top` | 1 | registers the sample for all 64 pipelines |
| select | `jigsaw_select` (+ `jigsaw_select_dim`) | 2 | distance, hit, wrap, tile address, table addresses |
| weight lookup | `jigsaw_weight_lookup` | 4 | dual-ported 256 x 32-bit table read (X and Y weights at once), complex product of the two |
| interpolation | `jigsaw_interp` | 3 | complex weight x complex sample value |
| accumulation | `jigsaw_accum` | 2 | read-modify-write of the SRAM entry |

Total: a sample on the input bus in cycle 0 is in the SRAM after the edge
that ends cycle 11, i.e. 12 cycles. Samples that miss a column pass through
that pipeline as empty slots. The sample value and the tile address travel in
delay lines to meet the weight.

Both complex multiplies use `jigsaw_cmul`, which takes three real multiplies
and five additions (Knuth's method):
`k1 = c(a+b), k2 = a(d-c), k3 = b(c+d); re = k1 - k3, im = k1 + k2`.

**Stall-free accumulation.** The SRAM read and write of one update are a
cycle apart. When two consecutive samples hit the same entry (samples close
together in the stream — common for spiral trajectories), the second would
read the value from before the first was added. `jigsaw_accum` forwards the
sum just written to the adder instead, so the pipeline never waits.

## Number formats

| quantity | format |
|---|---|
| coordinates x, y | unsigned Q10.22, in [0, N) |
| sample value, grid values | complex, 32-bit two's complement re and im |
| table weights and 2-D weight | complex, Q1.15 re and im |
| 2-D weight | (wx * wy) >> 15, saturated to 16 bits |
| contribution | (weight * value) >> 15, saturated to 32 bits |
| accumulation | 32-bit add per component, wrapping |

Shifts truncate (round toward minus infinity). The bit widths (32-bit
datapath, 16-bit weights, 256-entry table) follow the accelerator's
description; the binary points, truncation, saturation and wrapping are this
implementation's choices.

## Operating it (`jigsaw_top`, `jigsaw_ctrl`, `jigsaw_readout`)

Runtime configuration `cfg_in` = {nt = N/T (1..128), W (1..8), log2 L (0..6)}
is captured when gridding starts, so any N that is a multiple of 8 up to 1024
works; a smaller grid uses the low SRAM entries.

1. **Reset.** The controller sweeps every SRAM entry to zero, one entry of
   all 64 SRAMs per cycle ((N_MAX/T)^2 = 16384 cycles), then goes idle.
2. **Load the weight table** with `wt_we/wt_addr/wt_data` while idle; each
   write goes to all 64 pipelines' copies.
3. **Grid.** Pulse `cmd_start`. `in_ready` goes high; every cycle with
   `in_valid` is one sample on the 128-bit bus `in_data =
   {val.im, val.re, y, x}`. There is no back-pressure: the accelerator always
   keeps up. Mark the final sample with `in_last`. `irq_grid` pulses 12 cycles
   after it, when every update is in the SRAMs.
4. **Read out.** Pulse `cmd_readout` (allowed the cycle after `irq_grid`).
   `out_data` carries two 64-bit complex points per `out_valid` beat: tile by
   tile in address order, and within a tile the pipeline pairs (2k, 2k+1) with
   pipeline index `y*T + x`, lower pipeline in the low half. N x N points take
   N*N/2 beats; `out_last` marks the end. Each read also zeroes the entry, so
   the next grid can start straight away without another clear.

`cmd_clear` forces a new sweep. Commands are only accepted while idle (an
assertion checks it, and another checks the configuration range, the z
slice selection only in the 3D Slice build).
`acc_fire`, one bit per pipeline, shows each accumulation, and `sample_count`
the samples taken.

## 3-D grids: the 3D Slice variant (`DIM3 = 1`)

A 1024^3 grid of 64-bit points would need 8 GiB, a thousand times the on-chip
SRAM. The 3D Slice variant therefore keeps one z slice of N x N points in the
same SRAMs and grids the volume in N_z passes, one per slice. Build it with
`jigsaw_top #(.DIM3(1))`; the default (`DIM3 = 0`) is the 2-D accelerator and
ignores the z ports.

For each slice z0 the host sets `zcfg_in = {N_z, z0}` (captured with
`cmd_start`), streams *all* M samples with their z coordinate on `in_z`
(Q10.22, in [0, N_z)), waits for `irq_grid` and reads the slice out. Per
pass, two extra units in every pipeline decide and weight the z dimension:

* `jigsaw_select_z` computes `dz = (z - z0) mod N_z` and accepts the sample
  only when `dz < W` (the same window rule as in x and y, with the z axis
  periodic); it forms the z table address the same way as x and y.
* `jigsaw_weight_z` reads the z weight from its own copy of the table and
  multiplies it into the 2-D weight with a second complex multiply.

The x-y path is unchanged. The z multiply adds three cycles, so the pipeline
is 15 cycles deep, a pass takes M + 15 cycles and the volume (M + 15) * N_z.
The z window width equals W; there is no separate W_z setting. A host that
pre-sorts samples by slice can send each pass only the samples that reach it.

## Size and cost

At the defaults (T = 8, N_MAX = 1024) the design holds 64 SRAMs of 16384 x 64
bits (8 MiB, the whole 1024 x 1024 grid) and 64 weight tables of 256 x 32
bits (128 with `DIM3 = 1`, which adds a z copy per pipeline). The 3D Slice
build also adds one z select unit and one complex multiplier per pipeline.
The SRAMs are written as arrays with one read and one write port and a
synchronous read; a real implementation maps them onto SRAM macros. Nothing
else is process-specific.

## How far to trust it, and where it departs

Verified in simulation against a reference model written from the gridding
definition (it finds each reached point by searching every tile, and forms
complex products directly), bit-exactly:

* each unit on its own, with random and corner-case inputs;
* the whole accelerator at T = 8, N up to 64, four back-to-back operations
  with different N, W and L;
* the whole accelerator at its full default size: a 1024 x 1024 grid with
  W = 6, L = 32 and 4000 samples, every one of the 1M grid points read out and
  compared, then a second operation with N = 128, W = 8, L = 64.

The tests also check the 12-cycle latency, the M + 12 cycle stream time, and
that tile wraps, torus wraps, back-to-back updates of one entry, both halves
of the folded table and grid reuse after readout all occur.

Numerical accuracy is measured by `tb_jigsaw_quality`: a real
Kaiser-Bessel kernel (W = 6, grid oversampling 2) loaded into the table,
3000 random samples on a 128 x 128 grid, the fixed-point grid compared with a
double-precision gridding that uses the same table positions. The
normalised RMS difference is about 0.007 % for both L = 64 and L = 2. Against
the kernel evaluated at the exact distance, the table itself adds 0.56 % at
L = 64 and 18 % at L = 2 (nearest-entry lookup, no interpolation between
entries), so L, not the 32-bit datapath, sets the accuracy.

The 3D Slice variant is checked unit by unit (`jigsaw_select_z`,
`jigsaw_weight_z`) and end to end by `tb_jigsaw_top3d`: T = 8 on a
32 x 32 x 12 grid with W = 5, every slice gridded in its own pass and read
out in full against the reference, with z wraps, z misses and the M + 15
cycle pass time checked; and at full size by `tb_jigsaw_full3d`: the default
1024 x 1024 slices with N_z = 1024, four slices next to the z = 1023 / 0
seam, each read out in full (1M points) and compared.

Not in this RTL:

* the host side: DMA engine, host memory and interrupt controller;
* SRAM macros (arrays instead).

This implementation's own decisions, beyond the number formats above: the
coordinate format and bus layout, the separate `in_z` port and the
per-pass slice register of the 3D Slice variant, the z window equal to W,
the window convention and half-table addressing, the split of the 12 cycles over the stages, the controller state
machine with its clear sweep and read-and-clear readout, the readout order,
and the absence of back-pressure.

## Files and simulation

`rtl/` holds one module per file; `jigsaw_pkg.sv` has the shared types and
constants. `tb/` has a self-checking testbench per module
(`tb_<module>.sv`), `jigsaw_ref_pkg.sv` with the reference model, and
`tb_jigsaw_full.sv`, the full-size end-to-end test, `tb_jigsaw_top3d.sv`,
the 3D Slice end-to-end test, `tb_jigsaw_full3d.sv`, its full-size run, and
`tb_jigsaw_quality.sv`, the accuracy measurement. Each testbench prints
`TB_RESULT checks=N failures=F`.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/jigsaw_pkg.sv tb/jigsaw_ref_pkg.sv tb/tb_jigsaw_top.sv \
  --top-module tb_jigsaw_top -o sim
./obj_dir/sim
```

Swap in any other testbench name; `tb_jigsaw_full` builds in about 15 s and
runs in a few seconds, `tb_jigsaw_full3d` in about 20 s. Except in
`tb_jigsaw_quality`, the weight table used by the tests is
`re = 32767 - 120a`, `im = (73a mod 4001) - 2000` for entry a, chosen to
exercise the complex arithmetic rather than to be a real kernel; a real
deployment loads, for example, a Kaiser-Bessel kernel sampled at a / L.
