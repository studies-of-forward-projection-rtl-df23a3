# Ray-driven CT forward projector in SystemVerilog

A forward projector computes what a CT scanner would measure from a known
cross-section. The cross-section (the *phantom*) is a grid of attenuation values.
An X-ray source and a flat detector row turn around it, and each detector pixel
records the line integral of the phantom along the ray from the source to that pixel.
One view gives one row of a *sinogram*, and a full rotation gives the whole sinogram.
Iterative reconstruction needs this operation again and again, which is why a
hardware version is worth having.

This design is a fixed-function projector with one run per sinogram.

- Input: a 512 x 512 phantom of IEEE-754 single-precision values in external memory.
- Geometry: 1000 views over 180 degrees and a flat detector of 1000 pixels, each 1 mm wide.
- Source and detector: each 500 mm from the centre of the field of view (FOV).
  The FOV pixels are 1 mm squares.
- Output: a 1000 x 1000 sinogram of singles, written back to the same memory.

The method is ray-driven and follows a Bresenham-style walk. For each ray, the
hardware steps one pixel at a time along the ray's major axis. At every step it
works out which one or two pixels the ray crosses and how long the ray is inside
each. The sum of length x phantom value over all steps is the sinogram sample.

## Geometry

Coordinates are in mm with the FOV centre at (0, 0). Row 0 is the top row of the
phantom and column 0 the left column. Pixel (row, col) has its centre at
`(col - (N-1)/2, (N-1)/2 - row)` and is stored at word `row*N + col`.

For view k the angle is `theta = k*pi/1000`, covering 0 to pi. With `Ds` the
source distance, `Dd` the detector distance, and `Dc` the number of detector
pixels of width `Dw`:

```
source            S  = ( Ds*sin(theta), -Ds*cos(theta) )
detector start    D  = ( d0*cos(theta) - Dd*sin(theta), d0*sin(theta) + Dd*cos(theta) ),  d0 = -Dc*Dw/2
detector step     dD = ( Dw*cos(theta), Dw*sin(theta) )
pixel i centre    Di = D + (i + 0.5)*dD
ray direction     R  = S - Di
```

A ray is **vertical** when `|Ry| > |Rx|`; otherwise it is horizontal.

## The ray walk and the weights

This is the core of the design. It lives in `fp_loop.sv`. A vertical ray takes
one step per row and tracks a fractional column `c`. A horizontal ray does the same
with rows and columns swapped. For a vertical ray:

```
ratio = Rx/Ry                         column change per row (the step is -ratio)
c     = column where the ray crosses row 0
L     = sqrt(1 + ratio^2)             ray length inside one row
S, T  = (1 - |ratio|)/2, (1 + |ratio|)/2
inv   = L/(T - S)
```

At each row the hardware takes `m = floor(c + 0.5)` and `o = c - m`, so `o` lies in [-0.5, 0.5).

| case | condition | pixel m gets | neighbour gets |
|---|---|---|---|
| centre | `-S <= o <= S` | `L` | none |
| left | `o < -S` | `w = (o+T)*inv` | pixel m-1 gets `L - w` |
| right | `o > S` | `L - w`, with `w = (o-S)*inv` | pixel m+1 gets `w` |

The two shares add up to `L`. In the centre band the ray stays inside one column
for the whole row. Outside it, the ray crosses into the neighbour, and the share
grows linearly with the offset. Two rules apply at the FOV boundary:

- A step whose column `m` is outside the FOV adds nothing.
- A neighbour outside the FOV is dropped.

A ray therefore yields at most two entries per step, which is 1024 for a 512-pixel FOV.

The weight split is the one consistent with the geometry:

- In the left case, the current pixel gets `w`.
- The pixel beyond the column boundary gets `L - w`.
- The right case mirrors this.

A literal reading of one description of this method gives the current pixel
`L - w` instead. That would give the current pixel nothing when the ray passes
almost through its centre, so it was not used.

## Architecture

`fp_top` is a sequential state machine. Each step is a sub-module with an
ap_ctrl-style handshake (described under Interface):

```
per view:   fp_angle  -> fp_coords (contains fp_cordic)
per ray:    fp_orient -> fp_loop --push--> fp_stack --read--> fp_raysum -> fix_to_f32 -> fp_view_buf
per view:   fp_view_buf -> external memory (sinogram row k)
```

| module | role |
|---|---|
| `fp_pkg` | number format, geometry defaults, shared structs (`coords_t`, `orient_t`, `stack_entry_t`) |
| `fp_angle` | view count to angle in radians (one constant multiplication) |
| `fp_cordic` | cos/sin by rotation-mode CORDIC: 32 iterations, quarter-turn range reduction, 33 cycles |
| `fp_coords` | source, detector start and detector step of a view (35 cycles) |
| `fp_orient` | pixel centre, ray direction and vertical/horizontal flag (1 cycle) |
| `fp_loop` | ray set-up using `fp_div` (restoring divider) and `fp_sqrt` (digit-by-digit square root), then the walk |
| `fp_stack` | block RAM of (pixel index, weight) entries for one ray, with a sticky overflow flag |
| `fp_raysum` | reads the stack, fetches phantom samples from memory, accumulates weight x sample |
| `f32_to_fix`, `fix_to_f32` | conversions at the memory boundary (the second rounds to nearest even) |
| `fp_view_buf` | 1000 x 32-bit block RAM holding one sinogram row |

Steps never overlap. A ray is listed completely before its samples are fetched.
This is simple, and it is the main reason the design is slow; see Timing.

### Number format

All arithmetic inside is signed fixed point Q16.32 (48 bits). This has range
±32768 and resolution 2.3e-10. Phantom and sinogram stay IEEE-754 single precision
in memory and are converted at the edge. The quantity most sensitive to rounding
is `inv` for rays almost parallel to an axis, where `|ratio|` is close to 0:

- `inv` saturates there.
- The weights are clamped to 0..L, so the result is unaffected.

The testbenches hold sinogram samples to 1e-4 of a double-precision model.

## Interface

`fp_top` ports:

- **Control**:
  - `ap_clk`; `ap_rst_n` is a synchronous reset, active low.
  - `ap_start` must be held until `ap_ready`.
  - `ap_idle` is high only while waiting.
  - `ap_done` and `ap_ready` pulse together for one cycle after the last sinogram word has been written.
- **Memory**: one word-addressed port.
  - `mem_req`, `mem_we`, `mem_addr[31:0]` and `mem_wdata[31:0]` are held until `mem_gnt`.
  - Read data returns in order on `mem_rvalid` / `mem_rdata`.
  - The phantom is at `PH_BASE` (default 0). Sinogram sample (view k, pixel i) goes to `SINO_BASE + k*1000 + i` (default `SINO_BASE` = 512*512).
  - The port is meant to sit in front of a DRAM controller. The controller, the bus to a host processor and the host link are not part of this RTL.
- **Error**: `stack_overflow` is a sticky flag. It cannot fire at the default sizes; an assertion in `fp_top` checks this.

Parameters of `fp_top` and their defaults:

| parameter | default |
|---|---|
| `FOV_N_P` | 512 |
| `N_DET_P` | 1000 |
| `N_VIEWS_P` | 1000 |
| `SRC_DIST_P` | 500 |
| `DET_DIST_P` | 500 |
| `PH_BASE` | 0 |
| `SINO_BASE` | 512*512 |

## Timing

The times below assume a memory that grants every request:

- **Per view**: 1 + 35 cycles for angle and coordinates. The row write-back then takes about 2 cycles per detector pixel.
- **Per ray**:
  - 1 cycle for orientation.
  - About 210 cycles of set-up: two sequential 80-step divisions and one 40-step square root.
  - One cycle per step, plus one per neighbour entry (at most 2N).
  - 2 cycles per stack entry for the memory reads.

At full size with 20% of memory requests refused, the first three views took
6.4 million cycles. A whole sinogram is therefore about 2.1e9 cycles, or about
21 s at 100 MHz.

By comparison, the reference system was a high-level-synthesis build on an
Artix-7 in single-precision floating point, and it reported about 41 s. Its
per-module latencies (9, 30 and 26 cycles for angle, coordinates and orientation)
differ from this design's (1, 35 and 1) because those came from floating-point cores.

## Departures and choices

- **Arithmetic**: fixed point Q16.32 inside, not single-precision floating point.
- **Angle range**: views cover 0 to pi. A 360-degree scan appears only in an earlier pixel-driven software model.
- **Initial column**: the printed formula divides by the detector step `dDx = cos(theta)`. That would make the column depend on the view angle, so this design divides by the FOV pixel width (1 mm). The per-step change is `-Rx/Ry`; the printed formula has an extra division by `Ry`, which does not match the worked example of the loop.
- **S and T**: computed from `|ratio|`, so that `S <= T` for both signs of the slope.
- **Rounding of the column**: `floor(c + 0.5)` rather than truncation, so negative columns round correctly.
- **Tie between orientations**: `|Rx| == |Ry|` counts as horizontal.
- **Stack depth**: 2·N entries (not specified).
- **Memory port and layout**: the bus protocol and base addresses are this design's own. The source description reaches memory through a soft processor and an AXI interconnect.
- **Loop module structure**: the four set-up sub-steps (initial column, inverse, S/T, length per row) are merged into one module with a shared divider.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Shared helpers are in
`tb/tb_fp_pkg.sv`:

- real/single/fixed conversions;
- the modified Shepp-Logan phantom, generated from its ten ellipses;
- `ref_ray`, a double-precision model of one ray.

`tb/ext_ram_model.sv` is a behavioural memory that refuses a random share of requests.

| testbench | checks |
|---|---|
| `tb_fp_cordic`, `tb_fp_angle`, `tb_fp_coords`, `tb_fp_orient` | values against `$cos`/`$sin`, all view counts, a hand-worked horizontal-ray example, and exact latencies |
| `tb_fp_loop` | the loop's set-up values for a known ray (ratio 0.99649, L 1.41173, inv 1.41671, S 0.0017546); 60 random rays entry by entry against the model; cycle count |
| `tb_fp_stack`, `tb_fp_raysum`, `tb_fp_view_buf` | storage, overflow, accumulation with and without memory stalls, latency `2n+1` |
| `tb_f32_to_fix`, `tb_fix_to_f32` | 85.125 = 0x42AA4000, rounding carries, random values |
| `tb_fp_top` | a complete run at reduced size (32 x 32 FOV, 64 detector pixels, 24 views, distances 40 mm, 20% memory stalls) |
| `tb_fp_top_views` | `fp_top` at its default parameters, checking the first 3 views |

`tb_fp_top` compares all 1536 samples with the model and checks the handshake and
the memory traffic. It also counts each mechanism at least once:

- vertical and horizontal rays;
- the left, right and centre cases;
- steps outside the FOV;
- dropped edge neighbours;
- the CORDIC quarter turn;
- refused reads and refused writes.

A complete run at the default size was not simulated: about 2.1e9 cycles is too
long for a simulator. The largest complete run simulated is the reduced one in
`tb_fp_top`. `tb_fp_top_views` runs the full-size design for 3 of the 1000 views
(3000 samples).

To run a testbench with verilator:

```
verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_fp_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/fp_pkg.sv tb/tb_fp_pkg.sv tb/tb_fp_top.sv
./obj_dir/Vtb_fp_top
```

Replace `tb_fp_top` with any other testbench name. `tb_fp_top` and `tb_fp_loop`
look at internal signals of the design to count mechanisms and to check the set-up
values.

## Known limits

- The design is strictly sequential:
  - one memory read is outstanding at a time;
  - a ray's samples are fetched only after the whole ray has been listed;
  - the per-ray set-up is not overlapped with the previous ray.
- Only fan-beam geometry with a flat detector and a square FOV is supported. Sizes are set by parameters, not at run time.
- Subnormal phantom values read as 0. Values outside ±32768 saturate.
