# MVDR adaptive beamformer on a QR-RLS systolic array

This is synthesizable SystemVerilog for a receive beamformer that steers a
three-antenna array towards a wanted direction and, at the same time, places
a null on whatever interference arrives from elsewhere. It uses the Minimum
Variance Distortionless Response (MVDR) criterion. The weight vector `w`
minimises the output power `sum |w^H u(i)|^2`, subject to unit gain `w^H s(theta0) = 1`
in the look direction. The weights are adapted sample by sample with the
QR-decomposition RLS algorithm, and the algorithm is mapped onto a triangular
systolic array of Givens-rotation cells. For every antenna sample set `u(n)`
the array updates its state and emits one beam output

    e(n) = w^H(n) u(n),   w(n) = Phi^-1(n) s / (s^H Phi^-1(n) s),
    Phi(n) = lambda Phi(n-1) + u(n) u^H(n)

without ever forming `Phi^-1` or the weight vector explicitly.

Around the array sits a block RAM with a small sequencer. A host fills the
RAM with sample sets and starts a job. The sequencer streams the sets
through the array and writes the beam outputs back into a second region of
the same RAM.

In a simulation with 200 sample sets, the following scenario was used:

- Desired source: −70° at 10 dB SNR.
- Interferer: 30° at 40 dB INR.

After 200 sets the beam formed from the hardware's final state has gain
1.0000 towards −70° and −59 dB towards the interferer. Every output is
within 1e-5 of a double-precision MVDR computed directly from `Phi(n)`.
Long runs of up to 500,000 sets keep a unit-gain beam with a deep null.

## The rotation behind every cell

The whole datapath is one matrix identity applied once per sample set. The
state consists of:

- `L = Phi^(1/2)`, the lower-triangular Cholesky factor of `Phi` (`Phi = L L^H`).
- The auxiliary vector `a = L^-1 s`, which the array stores as the row `a^H`.

A unitary `Theta(n)` is chosen to zero the sample column of the pre-array:

    [ lambda^(1/2)  L(n-1)     u(n) ]            [ L(n)     0           ]
    [ lambda^(-1/2) a^H(n-1)   0    ]  Theta  =  [ a^H(n)   beta(n)     ]
    [ 0 ... 0                  1    ]            [  ...     gamma^(1/2) ]

`Theta` is the product of K complex Givens rotations. Rotation j combines
column j with the sample column and annihilates the j-th sample element.
Three useful quantities fall out of the post-array:

* `L(n)` and `a^H(n)`, the new state, since the rows are preserved.
* `beta(n) = -e'(n) gamma^(-1/2)(n)`: what remains of the zero that was
  appended to the auxiliary row.
* `gamma^(1/2)(n)`: the product of the rotation cosines, picked up by the
  "1" in the corner.

The beam output is then

    e(n) = -beta(n) gamma^(1/2)(n) / ||a(n)||^2.

Two conventions matter when using the array:

* **The auxiliary row holds `a^H`, not `a`.** It starts at
  `a^H(0) = s^H / sqrt(delta)` for `Phi(0) = delta I`. So `cfg_init_a` must
  be loaded with the *conjugate* of the steering vector divided by
  `cfg_init_phi = sqrt(delta)`. `a_out` shows `a^H`.
* **The auxiliary row is scaled by `lambda^(-1/2)`.** The Phi rows are
  scaled by `lambda^(1/2)`. With the default `lambda = 1` both scale factors
  are exactly one.

## The array

For K antennas (K = 3 by default) the array has these cells, with rows and
columns indexed from 0:

| cell | where | stores | does |
|---|---|---|---|
| boundary | (i, i), i < K | real diagonal `phi` of L | makes the rotation `(c, s)` that zeroes its input |
| internal | (i, j), j < i < K | element `L[i][j]` | applies the column's rotation to its element and the value from the left |
| auxiliary | (K, j) | element of `a^H` | same as internal, and adds `|x'|^2` to a norm running along the row |
| final | (K, K) | — | forms `e(n)` from `beta`, `gamma^(1/2)` and `||a||^2` |

The signals move through the array as follows:

- **Samples:** they enter row i from the left, and each cell passes its
  rotated value to the right.
- **Rotations:** they travel down their column.
- **Cosine product:** the product of the cosines travels down the diagonal,
  starting from the constant 1 at cell (0, 0). Each boundary cell multiplies
  it by its own cosine.
- **Skew:** row i receives its sample i beats late, and the auxiliary row
  (fed with zeros) K beats late. The diagonal link has one extra beat
  register. With this skew each cell finds its operands in the same beat
  without any handshaking.

A sample set that enters at the end of beat b produces `e` at the end of
beat `b + 2K + 1` (7 beats for K = 3). One new set is accepted every beat.

Beats without data ("bubbles") are allowed. An invalid sample makes the
boundary cell emit an invalid rotation. Cells that receive an invalid
rotation keep their state and pass the invalid mark on. This is how the
pipeline drains at the end of a job.

## The 51-cycle beat

All cells share one controller (`global_ctrl`). It counts phases 0..50 and
decodes a handful of strobes from the count. Every cell does its work once
per beat and releases its results in the last cycle. This keeps the array in
lock step, at the cost that cells faster than the boundary cell wait for it.

| phase | strobe | used by |
|---|---|---|
| 0 | `start` | all cells take their inputs; square root starts |
| 34 | (square root done) | boundary cell |
| 35 | `recip_load` | reciprocal unit takes and normalises its divisor |
| 36 | `recip_seed` | Newton-Raphson seed |
| 37–39 | `recip_iter` | three Newton-Raphson iterations |
| 42 | `recip_out` | reciprocal result registered |
| 45–48 | `mul_en`, `mul_step` 0–3 | output multiplier passes |
| 50 | `commit` | all results released; sample set taken; next beat begins |

The beat length of 51 cycles and the constants 35, 36, 42 and 45 come from
the original boundary-cell design. The assignment of each constant to an
event is this implementation's reading. An assertion in the boundary cell
checks that the square root is ready before the reciprocal loads it.

## Boundary cell: square root, reciprocal, one multiplier

The cell computes:

    f = lambda^(1/2) phi
    r = sqrt(f^2 + |u|^2)
    c = f / r
    s = conj(u) / r
    phi := r
    gamma_out = gamma_in * c

It is built from three units:

* **Square root (`sqrt_unit`).** Two CORDIC magnitude passes in cascade:
  - The first pass turns `(u_re, u_im)` into `|u|`.
  - The second turns `(f, |u|)` into `r`.
  - Each pass (`cordic_vec`) makes 16 micro-rotations, one per clock, plus
    a gain-correction multiply. The square root takes 34 cycles.
  - The CORDIC datapath has two integer guard bits for its gain of about
    1.647 and eight fraction guard bits. Its gain constant has 30 fraction
    bits and the result is rounded to nearest, so `r` is within about one
    LSB and has no systematic bias. A bias would matter: `phi := r` is fed
    back every beat, and a pull of a few LSB per update outweighs what
    small noise samples add to the diagonal.
* **Reciprocal (`nr_reciprocal`).** Newton-Raphson iteration:
  - The seed is `x0 = 2.9142 - 2 m`, followed by three iterations of
    `x := x (2 - m x)`.
  - The seed is only good for `m` in [0.5, 1]. The unit therefore first
    shifts the divisor there with a leading-one detector and returns the
    result as a mantissa and exponent: `1/D = q * 2^-e`.
  - This normalisation is an addition to the original unit, needed because
    `r` spans many octaves in the array.
  - Inside, `m` and the loop value carry 29 fraction bits and each step
    rounds. `q` leaves with those 29 bits and `e` is raised by 9 to match,
    so the pair still reads as `q * 2^-e` in the 20-fraction-bit format.
  - Relative error is below 1e-8.
* **One multiplier**, fed by a multiplexer in four passes:
  1. `f * q` → c
  2. `u_re * q` → s_re
  3. `-u_im * q` → s_im (the sine takes the conjugate)
  4. `gamma_in * c` → gamma_out

  The exponent `e` is applied as a shift inside the multiply.

A zero sample `u = 0` is the identity rotation: the cell outputs `c = 1`
and `s = 0` and sets `phi := f` exactly, without going through the square
root and the reciprocal. This covers `r = 0` too (no energy yet and a zero
sample). With `phi = 0` and `u != 0` the general formulas give `c = 0`,
`s = conj(u)/|u|` and `phi := |u|`.

## Internal and auxiliary cells: twelve products on two multipliers

A complex rotation of the stored element `x` and the incoming value `u` is

    xl = scale * x
    x' = c xl + s u
    u' = c u - conj(s) xl

This costs twelve real products. The cell runs them on two multipliers in
seven steps:

1. `scale * x` (re, im)
2. `c * xl`
3. and 4. `s * u`
5. `c * u`
6. and 7. `conj(s) * xl`

A per-step add/subtract select accumulates the partial sums. An eighth step
adds `|x'|^2` to the norm arriving from the left, so the last auxiliary cell
delivers `||a(n)||^2` to the final cell.

The sequence finishes within ten cycles, but the results are held until the
commit cycle, like those of every other cell. The original cell buffered its
operands in small RAMs; here they are registers.

## Final cell

`e = -beta * gamma^(1/2) / ||a||^2` uses the same reciprocal unit and one
multiplier in three passes:

1. `gamma * (1/||a||^2)`
2. and 3. the real and imaginary parts of `-beta` times that.

A zero norm gives `e = 0`.

## Sample buffer and job protocol

`sample_buffer` is one true dual-port RAM of DW-bit words:

| address | content |
|---|---|
| `2K n + 2k`, `2K n + 2k + 1` | set n, antenna k: real, imaginary |
| `OUT_BASE + 2n`, `OUT_BASE + 2n + 1` | beam output e(n): real, imaginary |

`OUT_BASE = 2K * MAX_SETS`. With the defaults (K = 3, `MAX_SETS` = 200) this
is 1200 input words, the 200 sets of three complex samples that one run
needs, plus 400 result words.

A host uses it as follows:

1. Write the sets through port A (`host_en`, `host_we`, `host_addr`,
   `host_wdata`). Reads return `host_rdata` one cycle later.
2. Load the initial state with a one-cycle `cfg_init` pulse while the buffer
   is idle:
   - `cfg_init_phi = sqrt(delta)`
   - `cfg_init_a[k] = conj(s_k) / sqrt(delta)`
3. Pulse `start` with `num_sets` (1..`MAX_SETS`). `busy` rises, and the
   array runs while it is high.
4. Wait for the one-cycle `done` pulse, which comes about `num_sets + 7`
   beats later. `busy` is then low.
5. Read the results from `OUT_BASE`.

While a job runs, the sequencer reads the next set in beat phases 1..6 into
a staging register and offers it to the array, which takes it at the commit
cycle. Each result is written back in phases 8 and 9 of the beat in which it
appears. After the last set the sequencer feeds bubbles until every result
is stored.

The array's state is **not** reset between jobs. Consecutive jobs continue
the same adaptation, so long runs are split into jobs of up to `MAX_SETS`
sets. Pulse `cfg_init` to start afresh. The weight vector can be formed at
any time from `l_out` and `a_out` as `w = L^-H a / ||a||^2`, with
`a = conj(a_out)`. The full-size testbench shows how.

## Number format and precision

All data are signed fixed point: 32-bit words with 20 fraction bits, a
range of ±2048 and a step of about 1e-6 (`DW`, `FW` in `mvdr_pkg`). The
array stores `Phi^(1/2)`, not `Phi`, so its dynamic range is half that of
`Phi` in bits.

The rotation parameters `c` and `s` never exceed 1, so they travel in the
same 32-bit words with 29 fraction bits (`RW`). Near convergence `1 - c`
drops below 2^-20; with 20 bits `c` would round to exactly 1 and the
auxiliary row would stop decaying.

Every product is rounded to nearest, not truncated. With `lambda = 1`
nothing forgets old errors, so a bias of half an LSB per multiply adds up
over tens of thousands of updates.

Inputs should be scaled so that `sqrt(sum |u|^2)` over a run stays well
below 2048. The original design studied input scalings from 2^-2 to 2^-13.
It found that convergence takes longer the coarser the effective precision.
`tb_mvdr_workloads` repeats that study (see Verification).

Measured accuracy:

| block | accuracy |
|---|---|
| CORDIC magnitude | 1e-6 relative + 2 LSB |
| square root | 1e-6 relative + 2 LSB |
| reciprocal | 1e-8 relative |
| c and s | limited by the square root's error divided by r, so small radii are the least accurate |
| beam output, 200 sets at 2^-5 | ≤ 6.1e-6 absolute against double precision |

## Top level

`mvdr_beamformer_top` joins the sample buffer and the array. Its ports:

| port | meaning |
|---|---|
| `host_*` | memory port (address width 11 for the defaults) |
| `start`, `num_sets`, `busy`, `done` | job control |
| `cfg_init`, `cfg_init_phi`, `cfg_init_a[K]` | initial state |
| `l_out[K][K]`, `a_out[K]` | adapted factor and auxiliary row |
| `beat_count` | beats run |

Parameters:

- `K` (antennas, 3)
- `MAX_SETS` (200)
- `LAMBDA_SQRT` and `LAMBDA_ISQRT` (`lambda^(1/2)` and `lambda^(-1/2)` as
  `fx_t`, both 1.0)

The sample buffer is one 1600 x 32-bit RAM for the defaults.

Each internal and auxiliary cell has two general multipliers. The boundary
and final cells each have one shared output multiplier, plus the fixed
multiplies inside the CORDIC gain correction and the Newton-Raphson loop. A
fully parallel internal cell would need twelve.

## What is not here

The original system placed the array as a peripheral on a soft processor's
bus. The processor received sample sets from a PC over Ethernet and moved
them between a block RAM and the array. None of that processor system is
included:

- the processor and its software
- its buses, Ethernet MAC, UART, DDR2 controller, interrupt controller and
  timer

The host side is a plain memory port with a start/busy/done handshake.
Other differences from the original design:

- The CORDIC core is a simple iterative one, not a vendor core.
- The internal cells buffer operands in registers, not RAM blocks.
- The reciprocal normalises its divisor.
- The square root has no 2^-2 input scaling. The original scales each
  input by 2^-2 to make room for the CORDIC gain. Here two guard bits inside
  the CORDIC give that room without dropping the two lowest bits.
- The reciprocal's mantissa and the rotation parameters carry 29 fraction
  bits instead of 20, and every product is rounded. Without this, runs of
  tens of thousands of sets drifted.
- How `||a||^2` reaches the final cell (a norm summed along the auxiliary
  row) is this design's choice.
- The forgetting factor is a parameter with default 1. The original does not
  give its value.

## Verification

Each block has a self-checking testbench in `tb/` that compares against
values computed independently in floating point (`tb/mvdr_ref_pkg.sv` holds
the complex arithmetic, a Gaussian-elimination MVDR reference and the
scenario generator):

| testbench | checks |
|---|---|
| `tb_cordic_vec` | magnitude of random vectors in all quadrants, latency 17 |
| `tb_sqrt_unit` | `sqrt(f^2+|g|^2)` over five decades, latency 34 |
| `tb_nr_reciprocal` | 1/D from 1e-6 to 2047, both normalisation directions, D <= 0 |
| `tb_global_ctrl` | every strobe at its phase, beat length 51, stop at end of beat |
| `tb_boundary_cell` | c, s, gamma, phi against the rotation formulas; u = 0 and r = 0; bubbles; init |
| `tb_internal_cell` | x', u', norm, rotation pass-through, for scale 1 and 0.875 |
| `tb_final_cell` | e against `-beta gamma / nrm` for norms from 1e-3 to 2000 |
| `tb_mvdr_systolic_array` | 80 samples against the direct MVDR, latency 2K+1, a bubble, beam gains |
| `tb_sample_buffer` | host port, three jobs incl. an empty one, order and completeness, drain |
| `tb_mvdr_beamformer_top` | full size at default parameters (below) |
| `tb_mvdr_workloads` | the input-scaling study through the top level (below) |

`tb_mvdr_beamformer_top` runs the whole design at its default parameters in
three jobs:

1. **Job 1:** 200 sets of the two-source scenario. Each output is checked
   against the reference. The final state is checked for `L L^H = Phi` and
   `L a = s`, and the beam formed from it must have unit gain at −70° and
   less than −40 dB at 30°.
2. **Job 2:** a zero start and a zero first set, which exercises the r = 0
   rotation and the zero-norm output.
3. **Job 3:** an empty job.

It counts and requires host writes and reads, sets taken, drain bubbles,
results stored, done pulses, zero-radius rotations, reciprocal normalisation
in both directions and zero-norm outputs. It runs in a fraction of a second.

`tb_mvdr_workloads` repeats the original input-scaling study on the top
level at its default parameters. For scales 2^-2, 2^-5, 2^-8 and 2^-13 it
feeds the scenario for 200, 900, 30,000 and 500,000 sets, the iteration
counts the original study needed at those scales. The sets go in chained
jobs of up to 200. It checks:

- the outputs of each run's last job against the direct MVDR;
- the weights formed from the final state against the floating-point MVDR
  weights;
- the beam: unit gain (±2%) at −70° and below −30 dB at 30°.

Results of one run:

| scale | sets | weight error | gain at −70° | at 30° (reference) |
|---|---|---|---|---|
| 2^-2 | 200 | 0.03% | 0.9999 | −59.2 dB (−59.2 dB) |
| 2^-5 | 900 | 0.03% | 1.0000 | −67.1 dB (−67.1 dB) |
| 2^-8 | 30,000 | 0.6% | 0.9997 | −73.8 dB (−76.5 dB) |
| 2^-13 | 500,000 | 32% | 1.014 | −59.3 dB (−88.3 dB) |

At 2^-13 a noise sample adds about 0.05 LSB to the noise part of the
diagonal. That part of `Phi^(1/2)` therefore cannot grow in 20 fraction
bits. The beam still has unit gain and a deep null, but the weights no
longer match the floating-point ones closely. The testbench allows 50% there
instead of 5%. The study takes about 45 s in Verilator; the `+short` plusarg
divides each run by 100.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_mvdr_beamformer_top \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/mvdr_pkg.sv tb/mvdr_ref_pkg.sv tb/tb_mvdr_beamformer_top.sv
    ./obj_dir/Vtb_mvdr_beamformer_top

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog that fails it if it hangs.

## Files

| file | contents |
|---|---|
| `rtl/mvdr_pkg.sv` | number format, link structs, beat schedule, fixed-point helpers |
| `rtl/cordic_vec.sv` | CORDIC magnitude |
| `rtl/sqrt_unit.sv` | two-CORDIC square root |
| `rtl/nr_reciprocal.sv` | normalising Newton-Raphson reciprocal |
| `rtl/global_ctrl.sv` | beat counter and strobe decoder |
| `rtl/boundary_cell.sv` | rotation generator |
| `rtl/internal_cell.sv` | rotation applier (also the auxiliary row) |
| `rtl/final_cell.sv` | beam output |
| `rtl/mvdr_systolic_array.sv` | the array with skew and controller |
| `rtl/sample_buffer.sv` | sample/result RAM and sequencer |
| `rtl/mvdr_beamformer_top.sv` | top level |
| `tb/*` | testbenches and the floating-point reference package |
