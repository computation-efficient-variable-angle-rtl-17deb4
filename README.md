# FPGA co-processor for variable-angle phase-shifted PWM of cascaded H-bridges

A cascaded H-bridge (CHB) converter stacks N full bridges in series. With
ordinary phase-shifted PWM, the carriers of the N cells are spaced evenly, and the
switching harmonics of the cells cancel in the total output voltage. That works
only while the cells are alike. When their DC voltages, modulation indices or
fundamental phase angles differ, as with photovoltaic panels or batteries on the
cells, the cancellation breaks down and the distortion of the output rises.
Variable-angle phase shifting (VAPS) fixes this by choosing each cell's carrier
angle so that the carrier-band harmonics of the sum are as small as possible.

No closed-form solution exists, so the angles are found by a particle-swarm
optimisation (PSO). On a DSP alone, one optimisation takes hundreds of
milliseconds, which is slower than the operating point of a PV converter changes. This RTL is the
FPGA half of a DSP + FPGA controller that speeds the search up:

* **HCUs** (harmonic calculation units) evaluate the cost of one particle each.
  Several run in parallel.
* **PUCUs** (particle updating calculation units) compute the PSO velocity and
  position update of one particle each.
* The DSP keeps the swarm, draws the random numbers and makes every decision.
  It moves operands and results over a 12-bit parallel bus.
* The same FPGA also runs the modulator. It generates the phase-shifted
  triangle carriers and compares them with the modulation references.

The default build has 4 cells, 4 HCUs and 1 PUCU, a 150 MHz clock and a
1.25 kHz carrier (120000 clocks per carrier period).

## The cost function

The DSP supplies, for each cell k and each harmonic (h1, h2), an amplitude
U_hkf. It also supplies each cell's fundamental angle phi_0,k. For a particle
with carrier angles phi_c,k, the harmonic sits at carrier-band index
h1 = 1, 2 and sideband index h2 = -2..3, and has this phase:

    phi_hkf = (2*h1*phi_c,k + (2*h2 - 1)*phi_0,k)  mod 2*pi

The cost is the squared magnitude of the harmonics of the summed output:

    U_h,sum^2 = sum over (h1,h2) of  X_hf^2 + Y_hf^2
    X_hf = sum_k U_hkf*cos(phi_hkf),   Y_hf = sum_k U_hkf*sin(phi_hkf)

That gives 12 harmonic pairs times N cells: 48 terms for 4 cells.
The amplitudes involve Bessel functions. They depend only on the operating point, so the DSP computes
them once per operating point and writes them into the FPGA. The testbenches
use `U_hkf = sqrt(2)*Udc/(pi*h1) * J_(2h2-1)(h1*pi*M) * (-1)^(h1+h2-1)`
(see `tb/vaps_tb_pkg.sv`).

### Angles are per-unit numbers with base pi

Every angle is a 9-bit unsigned word holding angle/pi, with 1 integer and 8 fraction
bits. The range [0, 2) covers one full turn. As a result:

* `mod 2*pi` is plain 9-bit wrap-around. The HCU forms
  `2*h1*phi_c + (2*h2-1)*phi_0` with small constant multipliers and keeps the
  low 9 bits.
* `mod pi` for the particle positions keeps the 8 fraction bits. Carrier angles
  only matter modulo pi, because each cell uses two opposite carriers.
* A carrier angle phi_c is measured against the carrier period (2*pi = one
  period). The carrier shift in clocks is therefore `(phi_word * PERIOD) >> 9`.

## Harmonic calculation unit (`hcu`)

The HCU is the heart of the design. It trades speed for size: it has only one
trigonometric unit and one pair of multipliers. This keeps each HCU small
enough that several fit side by side.

```
start -> latch phi_c, phi_0
      -> all 12*N phases phi_hkf at once (parallel, constant multipliers)
      -> parallel-to-series: one phase per clock, (h1,h2) outer, cell k inner
      -> pipelined CORDIC: cos, sin                       (ITER+2 clocks)
      -> U_hkf*cos, U_hkf*sin                             (1 clock)
      -> accumulate N cells -> X_hf, Y_hf                 (1 clock)
      -> square, store in slot (h1,h2)  (series-to-parallel, 1 clock)
      -> after the 12th pair: add the 24 squares -> U_h,sum^2 (1 clock)
```

Each term carries a tag, its (h1,h2) pair and its cell index, through the pipeline.
The multiplier stage uses the tag to pick the matching U_hkf, and the accumulator uses
it to know when a pair is complete. The latency from `start` to `done` is
`12*N + ITER + 5` clocks: 65 clocks (0.43 us at 150 MHz) for 4 cells, and 137
clocks for 10 cells. A new particle can start once `done` has been seen.

Word formats (sign / integer / fraction bits) at each step:

| quantity                   | format      | note                                |
|----------------------------|-------------|-------------------------------------|
| U_hkf                      | 1 / 12 / 12 | 25 bits, written as three bus words |
| phi_hkf, phi_c, phi_0      | 0 / 1 / 8   | p.u., base pi                       |
| cos, sin                   | 1 / 1 / 8   | CORDIC output, rounded              |
| U*cos, U*sin               | 1 / 10 / 18 | truncated by 2 bits, saturated      |
| X_hf, Y_hf (sum over k)    | 1 / 10 / 10 | truncated, saturated symmetrically  |
| X_hf^2, Y_hf^2             | 0 / 20 / 20 | exact                               |
| U_h,sum^2                  | 0 / 20 / 4  | truncated, saturated                |

Every narrowing step truncates low bits and saturates at the top. Results lie
within 1 % (plus 2 LSB) of a floating-point evaluation for 4 cells, and within
about 2 % for 10 cells, where ten rounded 8-bit cos/sin terms add up.

`u_hkf` is read while the unit runs. The DSP must not rewrite the amplitudes
while any HCU is busy. `phi_c` and `phi_0` are latched at start.

### CORDIC (`cordic_sincos`)

The CORDIC is a rotation-mode design, fully pipelined, and takes one angle per clock. The input stage
folds the angle into [-pi/2, pi/2): angles in the second and third quadrants are
moved by pi and their results negated. The stage then starts x at the CORDIC gain
0.60725 and y at 0. The x/y datapath is 18 bits wide with 14 fraction bits. The
angle accumulator uses 2^16 per pi. The arctangent table is
`round(atan(2^-i)/pi * 2^16)`. With 12 iterations, every output
is within one LSB (1/256) of the rounded exact value over all 512 input angles.

## Particle updating unit (`pucu`)

All cells of a particle are updated in parallel, and the result is registered one
clock after `start`:

    v'   = saturate( w*v + cp*r1*(pbest - phi) + cg*r2*(gbest - phi),  +-VLIM )
    phi' = (phi + v') mod pi

* w, cp and cg are powers of two and are applied as shifts: `OMEGA_SHIFT = -1`
  (w = 0.5), `CP_SHIFT = CG_SHIFT = 1` (cp = cg = 2).
* r1 and r2 are 9-bit fractions in [0, 1) drawn by the DSP.
* Velocities are signed p.u. with 8 fraction bits (1 sign, 0 integer bits).
* `VLIM = 64` means pi/4.
* The sum keeps 17 fraction bits, truncates to 8 and then saturates.

The coefficient values and VLIM are this design's defaults. Any power-of-two
setting can be selected through the parameters.

## The DSP bus and the memory map

`dsp_bus_if` is the slave of an asynchronous parallel bus with the following signals:

* chip select, write strobe and read strobe, all active low;
* a 12-bit word address;
* 12-bit data.

All inputs pass through two-flop synchronizers. A write is committed once, at
the end of the write strobe, using address and data sampled while the strobe was
active. Read data is valid on `bus_dout` four clocks after the read strobe and address become active. The
strobes must meet these timings:

* write strobe: active for at least 3 FPGA clocks;
* gap between accesses: at least 2 clocks;
* read strobe: active for at least 4 clocks.

These timings allow about 30 Mwords/s at 150 MHz.

`cu_regfile` holds every variable in registers, so that all units read their
operands at the same time. It has this address map (also in `rtl/vaps_pkg.sv`):

| address                 | content                                                     |
|-------------------------|-------------------------------------------------------------|
| `0x000 + 4*i + w`       | U_hkf, i = (h1i*6 + h2i)*N + k; w = 0: bits 11:0, 1: 23:12, 2: bit 24 |
| `0x200 + k`             | phi_0,k                                                     |
| `0x240 + k`             | phi_c*,k, the modulator's carrier angles                    |
| `0x280 + k`             | m*_k, modulation reference, signed, 11 fraction bits        |
| `0x2C0 + k`             | global best phi_c,g,k, shared by all PUCUs                  |
| `0x3F0` (write)         | start mask of the HCUs                                      |
| `0x3F1` (write)         | start mask of the PUCUs                                     |
| `0x3F2` / `0x3F3` (read)| done masks of HCUs / PUCUs (set by done, cleared by start)  |
| `0x400 + 32*j + k`      | HCU j: carrier angle k of its particle                      |
| `0x400 + 32*j + 30/31`  | HCU j: U_h,sum^2 bits 11:0 / 23:12 (read only)              |
| `0x600 + 128*j + 16*f + k` | PUCU j: f = 0 v, 1 phi, 2 pbest, 3 r1 (k=0) / r2 (k=1), 5 phi' and 6 v' (read only) |

The map allows up to 10 cells, 12 HCUs and 4 PUCUs.

### One PSO iteration as seen from the DSP

1. Once per operating point, write U_hkf and phi_0.
2. For each group of up to N_HCU particles:
   1. Write their angles into the HCU slots.
   2. Write the start mask.
   3. Poll the done mask.
   4. Read the costs.
   5. Update the personal and global bests.
3. Write the global best.
4. For each particle:
   1. Write v, phi, pbest, r1 and r2 into a PUCU slot.
   2. Start it.
   3. Read back phi' and v'.
5. After the last iteration, evaluate the best particle and the angles in use
   on two HCUs. Write the better set to phi_c*.

Most of the time goes into the bus traffic. An HCU finishes a 4-cell particle in
65 clocks, far less time than the DSP needs to write its four angles and read
two result words.

## Modulator

`vaps_carrier_gen` has one master counter, 0..PERIOD-1. The rising edge of the
DSP's synchronization clock restarts it, three clocks after the edge arrives;
otherwise the counter wraps freely. Each cell adds its shift modulo PERIOD and
folds the result into a triangle that runs from -PERIOD/2 at phase 0 up to
+PERIOD/2. New carrier angles take effect only at the start of a master
period, so a carrier never jumps in the middle of a period.

`pwm_comparator` drives each H-bridge with two opposite carriers, which
doubles the switching frequency seen at the cell's output:

* leg A is on while m*_k > c_k;
* leg B is on while -m*_k > c_k.

The references are taken over at each period start. The outputs are the
upper-switch commands of the two legs. Complementary lower-switch signals and
dead time are left to the gate drivers.

## Parameters of `vaps_fpga_top`

| parameter        | default | meaning                                        |
|------------------|---------|------------------------------------------------|
| `N_CELLS`        | 4       | cascaded cells, 1..10                          |
| `N_HCU`          | 4       | harmonic calculation units                     |
| `N_PUCU`         | 1       | particle updating units                        |
| `CARRIER_PERIOD` | 120000  | clocks per carrier period (150 MHz / 1.25 kHz) |
| `CORDIC_ITER`    | 12      | CORDIC iterations (8..16)                      |
| `OMEGA_SHIFT`, `CP_SHIFT`, `CG_SHIFT` | -1, 1, 1 | PSO coefficients as shifts |
| `VLIM`           | 64      | velocity limit, 1/256 p.u. units               |

## Files

`rtl/` contains the following files:

* `vaps_pkg.sv`: formats, constants and the address map.
* `vaps_fpga_top.sv`: the top level.
* One file per unit: `hcu`, `cordic_sincos`, `pucu`, `dsp_bus_if`,
  `cu_regfile`, `vaps_carrier_gen` and `pwm_comparator`.

`tb/` contains one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`. The end-to-end testbenches are:

* `tb_vaps_fpga_top` plays the DSP at default sizes. It optimises the angles of
  a 4-cell operating point with 100 particles and 10 iterations, using only the
  bus. It checks every HCU cost against floating point and every PUCU result bit
  for bit. It then switches to the new angles and checks each cell's switching
  instants and duty cycles over a full 120000-clock carrier period. It also
  counts the mechanisms it exercises: parallel HCU runs, velocity saturation,
  wrap modulo pi, reference update at the period start and restart by the
  synchronization clock. It runs in a few seconds.
* `tb_vaps_ncell` runs the same optimisation on 10 cells.

`tb/vaps_tb_pkg.sv` holds the floating-point reference: Bessel series,
harmonic amplitudes and the cost function.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv \
    rtl/vaps_pkg.sv tb/vaps_tb_pkg.sv tb/tb_vaps_fpga_top.sv --top-module tb_vaps_fpga_top
./obj_dir/Vtb_vaps_fpga_top
```

The same command builds any other testbench: name its file and module instead.
The top-level testbench runs for about a second of wall time.

## How far the RTL follows the method, and where it departs

These parts follow the method:

* The split into HCUs, PUCUs, a shared memory, carrier generation and PWM
  comparison.
* The 12-bit bus.
* The harmonic orders (h1 = 1, 2; h2 = -2..3).
* The phase formula with its mod 2*pi.
* The use of CORDIC.
* The serial HCU datapath: phase generation, parallel-to-series, cos/sin,
  multiply, sum over cells, square, series-to-parallel, sum.
* The PUCU datapath: shifts for the coefficients, multiplications by r1 and
  r2, saturation, and mod pi.
* Every word format in the table above.
* The default sizes and clock rates.

These points are this design's own choices:

* **Per-unit base.** Reading the angle formats as angle/pi is an
  interpretation. It is consistent with one integer bit and with a position
  reduced modulo pi.
* **Phase formula.** The phase is built as `2*h1*phi_c + (2*h2-1)*phi_0`, with
  no extra factor of pi on the carrier term.
* **Trigonometry.** The functions are computed by a pipelined CORDIC. The
  original implementation also mentions lookup tables for the trigonometric
  and Bessel functions. Here the Bessel terms are the DSP's job, folded into
  U_hkf.
* **Multiplier sharing.** Each HCU shares one pair of amplitude multipliers
  across all cells. The original hardware cost grows with the cell count (about 148
  9-bit multipliers for 10 cells with 4 HCUs and 1 PUCU), which suggests more
  parallel multipliers per HCU than here.
* **One device.** The original splits 4 HCUs and 1 PUCU over two small FPGAs.
  This top puts all units into one device.
* **Unspecified details, chosen here.** The bus protocol and timing, the
  address map and start/done registers, rounding, the PSO coefficients and
  velocity limit, the m* format, how the synchronization clock is used, the
  update of references at the period start, and the phase origin and sign of
  the carrier shift.
* **Left out.** A PLL (the clock is an input), dead time, and everything on
  the DSP side.
