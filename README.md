# CORDIC 3-D vector interpolator

This design rotates 3-D vectors on a sphere using only shifts and adds. It
also produces intermediate vectors between two given vectors, as needed to
interpolate normals or light directions in 3-D rendering. Each vector is
turned by an azimuth increment **alpha** and a polar increment **beta**.
Linear interpolation followed by renormalisation would need a square root and
a division. Here the polar components are interpolated linearly and the
vector is then rotated. A rotation keeps the vector's length, so the result
needs no normalisation.

The hard part is making a 3-D spherical rotation fit CORDIC micro-rotations.
This design keeps three *auxiliary coordinates* next to the Cartesian ones.
With them, one CORDIC iteration can turn both angles at once. A whole 3-D
rotation therefore takes the time of one ordinary 2-D CORDIC computation.

## The auxiliary coordinates

For a vector of length R, azimuth θ (in the x-y plane) and polar angle φ
(measured from the z axis):

    X = R cosθ sinφ    U = R cosθ cosφ
    Y = R sinθ sinφ    V = R sinθ cosφ
    Z = R cosφ         W = R sinφ

(U,V,W) is the vector with its polar angle advanced by 90°. Turning θ by α and
φ by β is a linear map of the six numbers. Take α = δ·atan(2^-i) and
β = ρ·atan(2^-i), with δ, ρ ∈ {−1, +1}. The map then needs only shifts by
2^-i, except for the common factors 1/k_i² and 1/k_i, where
k_i = sqrt(1+2^-2i):

    [U;V]' = Rδ·[U;V] − ρ 2^-i · Rδ·[X;Y]      Rδ: [a;b] → [a − δ2^-i b ; b + δ2^-i a]
    [X;Y]' = Rδ·[X;Y] + ρ 2^-i · Rδ·[U;V]
    W'     = W + ρ 2^-i Z
    Z'     = Z − ρ 2^-i W

After n iterations the pairs carry the gain K² and Z, W carry K, where
K = Π k_i ≈ 1.64676. The rotator removes both gains with one constant
multiplication per output. The directions δ_i and ρ_i are the signs of the
residual angles, as in ordinary rotation-mode CORDIC. So α and β may each be
up to ±1.743 rad.

## Blocks

```
            host port                       theta1,theta2,phi1,phi2,t
                |                                      |
   +------------v-----------+     XYZ       +----------v---------+
   | graphic memory (X,Y,Z) |---------------> polar_interp        |
   +------------+-----------+               +----------+---------+
        XYZ     |      ^ rotated XYZ            alpha, beta
   +------------v------+----+               +----------v---------+
   | aux_coord_gen          |               | cordic3d_rotator   |
   | (U0,V0,W0) from XYZ    |               | XYZ,UVW -> rotated |
   +------------+-----------+               +---^------------+---+
        UVW0    v                      XYZ, UVW |            | rotated UVW
   +------------------------+-------------------+            |
   | auxiliary memory (U,V,W)<-------------------------------+
   +------------------------+
   ctrl_fsm: sequences all of the above, one address at a time
```

| module | role |
|---|---|
| `cordic_pkg` | word types, the atan(2^-i) table, 1/K and 1/K² constants, scaling helpers |
| `vi3d_top` | the system; host access to the two banks |
| `ctrl_fsm` | control unit, states A–H |
| `vec_mem` | one bank of 256 three-word vectors (used twice) |
| `aux_coord_gen` | (X0,Y0,Z0) → (U0,V0,W0), plus atan(Y0/X0), atan(ρ/Z0), R |
| `cordic_circ_unit` | word-serial circular CORDIC, vectoring or rotation mode |
| `cordic_lin_vec_unit` | word-serial linear CORDIC in vectoring mode, used as a divider |
| `cordic3d_rotator` | the 3-D rotator: six coordinates, one iteration per clock |
| `pair_gen` | (U,V) or (X,Y) generator: two 2-D micro-rotations, shifter, add/sub |
| `zw_gen` | W or Z generator: shifter and add/sub |
| `angle_addsub` | residual-angle step and rotation direction |
| `polar_interp` | α = t(θ2−θ1), β = t(φ2−φ1) |

### 3-D rotator (`cordic3d_rotator`)

Each clock performs one iteration on all six coordinates and both residual
angles:

- The **(U,V) generator** (`pair_gen`, SUB=1) micro-rotates (U,V) by δ_i. It
  also micro-rotates (X,Y) by δ_i, shifts that result by 2^-i, and subtracts
  it when ρ_i = +1 or adds it when ρ_i = −1.
- The **(X,Y) generator** (`pair_gen`, SUB=0) is its mirror image, and adds
  when ρ_i = +1.
- The **W and Z generators** (`zw_gen`) are each half a 2-D CORDIC.
- The **two angle datapaths** (`angle_addsub`) remove ±atan(2^-i) from α_i and
  β_i. The signs of the residual angles give δ_i and ρ_i.

This comes to four 2-D micro-rotations plus two halves. After N_IT = 30
iterations the outputs are multiplied by 1/K² (X,Y,U,V) or 1/K (Z,W).

Timing: while `en` is high, an idle unit samples its inputs on the next edge.
`ready` rises N_IT edges later and stays high, with the results, until `en`
falls. The results stay on the outputs after `en` falls, because the
controller writes them back one state later.

### Auxiliary coordinate generator (`aux_coord_gen`)

This block is built entirely from nine CORDIC units, in three phases of N_IT
clocks each:

1. A circular vectoring unit turns (|X0|, Y0) onto the x axis. This gives
   K·sqrt(X0²+Y0²) and atan(Y0/X0).
2. That length is multiplied by 1/K. A second vectoring unit then turns
   (Z0, sqrt(X0²+Y0²)) onto the x axis, which gives φ0 and K·R. Four
   rotation-mode units follow its direction bits in the same clock cycles.
   They turn (X0,0), (Y0,0), (Z0,0) and (1,0) by +φ0, giving
   K·X0·(cosφ0, sinφ0), and so on for Y0, Z0 and 1.
3. Three linear vectoring units divide:
   - U0 = (K X0 cosφ0)/(K sinφ0)
   - V0 = (K Y0 cosφ0)/(K sinφ0)
   - W0 = (K Z0 sinφ0)/(K cosφ0)

   The gain K cancels in each quotient.

The vectoring units use the direction rule σ = −sign(x)·sign(y). When Z0 < 0,
the second vectoring unit therefore ends on the *negative* x axis. Its angle
output is then φ0 − 180° and its length is −K·R. The sign cancels in the
quotients, so U0, V0 and W0 are right for every polar angle. The reported
angle is the principal value atan(sqrt(X0²+Y0²)/Z0), and `r0` is the
magnitude.

Latency: `ready` rises 3·N_IT+2 edges after the sampling edge.

### Control unit (`ctrl_fsm`) and system timing

| state | generator | rotator | aux. memory | graphic memory | leaves when |
|---|---|---|---|---|---|
| A | enable | – | – | read | generator ready → B |
| B | enable | – | write (U0,V0,W0) | – | always → C |
| C | enable | – | write | – | aux-memory write ready → D |
| D | – | enable | read | read | rotator ready → E |
| E | – | – | write rotated UVW | write rotated XYZ | always → F |
| F | – | – | write | write | graphic-memory write ready → G |
| G | – | – | – | – | address+1 → A; after the last address → H |
| H | – | – | – | – | only by reset; `done` = 1 |

Reset enters A at address 0, so releasing `rst_n` starts one pass over all
256 entries. Each entry takes 4·N_IT+11 = 131 cycles:

- 3·N_IT+4 cycles in A
- N_IT+2 cycles in D
- one cycle in each of B, C, E, F and G

A full pass takes 33 536 cycles, which is 1.68 ms at 20 MHz. The banks
acknowledge a write one cycle after it, so C and F never wait longer than
their own cycle. A slower memory would make them wait.

### Host access (`vi3d_top`)

The host owns both banks while `rst_n` is low or `done` is high:

- `host_we` and `host_wdata` write (X,Y,Z) at `host_addr`.
- `host_xyz` and `host_uvw` show both banks at `host_addr`.

The memories are not reset, so their contents survive a reset. A finished
pass can be followed by another pass with new angles: set the angle inputs,
pulse `rst_n` low, and release it.

`aux_theta`, `aux_phi` and `aux_r` show the polar form of the last vector the
generator processed. They change when the generator finishes an entry
and hold until it starts on the next one. Sample them when the address advances to
read the polar components of the previous entry.

### Interpolating between two vectors

To produce vectors between V1 and V2:

1. Store V1 and V2 and run a pass with t = 0. The pass leaves the memory
   unchanged and yields θ and φ of each vector on the `aux_*` outputs.
2. For each position t, store V1 and run a pass with
   (theta1, phi1) = polar(V1), (theta2, phi2) = polar(V2) and `t_pos` = t·2^16.

`tb_fig7_interp` does exactly this for t = 1/5 … 4/5. For vectors with Z < 0,
the polar angle read from `aux_phi` is the principal value, so add π to it.
This must be done outside the design, because π does not fit the Q2.30 angle
format.

## Number formats, accuracy and valid inputs

- **Formats.** Coordinates and angles are signed Q2.30 in 32 bits, covering
  [−2, 2). Angles are in radians. Inside the CORDIC units, words are Q4.30 in
  34 bits, so the K² ≈ 2.71 growth cannot overflow. Outputs saturate to Q2.30.
- **Input length.** It must satisfy R < 1. The linear CORDIC starts at shift
  2^-1, so a quotient must lie in (−1, 1), and |U0|, |V0|, |W0| ≤ R.
- **Vectors to avoid.** Avoid vectors on the z axis, where U0 and V0 are 0/0.
  Near the x-y plane, W0 is a quotient by cos φ0. The quotient error is about
  2^-25 divided by the divisor, so keep |cos φ0| and sin φ0 above about 0.02
  for errors below 1e-6.
- **Rotation range.** |α| and |β| must not exceed 1.743 rad.
- **Observed accuracy.** The testbenches see errors below 1e-6 for the rotator
  and 2e-6 for the generator. End to end they stay below 1e-5, including two
  passes in a row.
- **The `t_pos` input.** It is unsigned with 16 fraction bits, so 0x10000
  means t = 1.

## Departures and own choices

The blocks, the iteration equations, the generator structure, the nine-unit
auxiliary generator, the two memory banks and the states with their outputs
follow the published architecture. Everything below is this design's own,
or departs from it:

- **Adders.** The original is built on *redundant* (carry-free) CORDIC
  arithmetic but does not describe it. This design uses ordinary two's
  complement adders. The results are the same; the critical path is longer.
- **Schedule.** Every CORDIC block is word-serial, one iteration per clock.
  The parallelism inside an iteration follows the original; pipelining across
  iterations is not built.
- **W generator sign.** The original architecture drawing marks the W
  generator's adder as subtracting. The iteration equations add ρ·2^-i·Z,
  which is also what a correct rotation needs, and this design follows the
  equations.
- **Second vectoring unit.** The original drawing of the auxiliary generator
  labels this unit's angle as the elevation atan(Z0/sqrt(X0²+Y0²)). The
  definitions of U, V and W need the polar angle from the z axis, so this
  unit receives x = Z0 and y = sqrt(X0²+Y0²).
- **Scaling between phases.** A 1/K scaling between the first and second
  vectoring units was added; without it the second angle is wrong. Phase 1
  uses |X0|.
- **Gain compensation.** The rotator removes K² and K by post-scaling. The
  original allows either pre- or post-scaling.
- **Word format and sizes.** The Q2.30 split, N_IT = 30 and the depth of 256
  entries are this design's choices. The original gives only the 32-bit word.
- **Control handshakes.** The state diagram prints no outputs for C, F and G.
  C and F repeat B and E, and G drives nothing.
- **Exits from G.** Both exits from G carry the same printed condition. This
  design returns to A until the last address and then goes to H.
- **Starting a pass.** There is no start input: reset enters A, as in the
  diagram. The host port is this design's own.
- **Generator and rotator overlap.** The generator and the rotator could
  overlap (generator on entry k+1 while entry k rotates), as the original's
  text suggests. The controller follows the state diagram and runs them one
  after the other.
- **Power awareness.** The original calls the system power-aware, with energy
  savings from precision control, but gives no mechanism, so none is built.
  Lowering N_IT trades precision for cycles at build time.
- **Physical implementation.** The chip layout, cell library and pads are not
  part of this RTL.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops with
`$finish`. It also has a watchdog that counts a failure if the simulation
hangs. To build and run one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/cordic_pkg.sv tb/tb_fix_pkg.sv \
          tb/tb_vi3d_top.sv --top-module tb_vi3d_top -Mdir obj_top
obj_top/Vtb_vi3d_top
```

| testbench | what it checks |
|---|---|
| `tb_vi3d_top` | Whole system at default size (256 entries, 30 iterations), in two passes (t = 0.6, then t = 1). Checks all 1536 stored words of each pass against trigonometry and the cycle counts per entry. Counts each control mechanism: waiting for the generator, each write handshake, waiting for the rotator, address steps and finishing. |
| `tb_fig7_interp` | Four intermediate vectors between two vectors, with the polar components taken from the hardware. |
| `tb_cordic3d_rotator` | 400 random rotations, all six outputs, latency N. |
| `tb_aux_coord_gen` | 200 random vectors with polar angles up to 171°, all outputs, latency 3N+2. |
| `tb_cordic_circ_unit`, `tb_cordic_lin_vec_unit` | The CORDIC units against atan, sqrt and division. |
| `tb_pair_gen`, `tb_zw_gen`, `tb_angle_addsub` | One iteration against the iteration equations. |
| `tb_ctrl_fsm` | Every output in every cycle against a model of the state table, with random handshake delays so that every wait loop is taken. |
| `tb_vec_mem`, `tb_polar_interp` | The memory bank with its write acknowledge, and the interpolation arithmetic. |

`tb_fix_pkg` holds the real-number conversions the testbenches share.

## Changing the design

- **`N_IT`** is a parameter of the rotator, the generator and the top, and
  may be 1 to 30. The 1/K constants in `cordic_pkg` are exact for N_IT ≥ 16.
  For fewer iterations, recompute them as Π_{i<N_IT} (1+2^-2i)^(-1/2) and
  Π_{i<N_IT} (1+2^-2i)^(-1).
- **`DEPTH`** sets the number of vectors in each bank.
- **The word format** is set by `DATA_W`, `DATA_FRAC` and `INT_W` in
  `cordic_pkg`. If you change it, also regenerate the atan table,
  round(atan(2^-i)·2^DATA_FRAC), and the constants.
