# Table-lookup sine and cosine for FPGAs

This unit computes the sine or cosine of an angle given in degrees without
doing any arithmetic on the function itself. The answer is read from a
precomputed table held in block RAM. Only the first quadrant is stored:
1800 words, one every 0.05 degree. A small front end uses the symmetries
of sine and cosine to map any angle onto that quadrant. It works out the
sign and, for the two angles where the magnitude is exactly 1, sets an
integer bit. The table is about a quarter of what a full-turn table would
need (7200 words), and the whole computation takes two clock cycles.

Two feedback systems are built on the unit to show how its quantisation
behaves when the results are fed back:

- a **rotation system** that iterates a 2-D rotation by a fixed angle
  gamma = a·t0, so that the error accumulates over many steps;
- a **steady-state system** that iterates z(k+1) = sin(128·z(k)) until it
  settles near its fixed point, z ≈ 0.90.

All three stand side by side in the top level, `trig_system`.

## Number formats

| word | width | layout | meaning |
|---|---|---|---|
| angle | 18 | `[17]` sign, `[16:8]` degrees, `[7:0]` fraction | two's complement, 1/256 degree per LSB, −512 … +511.996° |
| result | 18 | `[17]` sign, `[16]` integer bit, `[15:0]` fraction | **sign and magnitude**, 2⁻¹⁶ per LSB, −1.0 … +1.0 |

The result is in sign-and-magnitude form, not two's complement. The integer
bit is set only for a magnitude of exactly 1.0, and the fraction is then
zero. A zero result always has a positive sign. `trig_pkg::result_to_tc`
converts a result to 18-bit two's complement Q2.16 (2 integer bits, 16
fraction bits).

The angle word has finer steps (1/256°) than the table (1/20°). The angle is
resolved to the table grid by truncation, so every angle in
[n·0.05°, (n+1)·0.05°) gives the same result.

## From angle to table address (`compl_locator`)

This stage is the core of the design and is purely combinational. For an
angle t and a sine/cosine select:

1. **Complement.** A negative angle is negated to its magnitude |t|.
2. **Scale.** |t| is multiplied by 20, the number of table steps per
   degree. The 8 angle fraction bits are dropped, giving g = ⌊20·|t|⌋ in
   table steps. For example, 90° is step 1800 and 360° is step 7200.
3. **Cosine shift.** For cosine, 1800 steps are added, because
   cos t = sin(t + 90°). Cosine is even, so using |t| loses nothing.
4. **Whole turn.** If g ≥ 7200, then 7200 is subtracted. The largest
   reachable g is 602° × 20 = 12 040, so one subtraction is enough.
5. **Fold into the first quadrant:**

   | reduced g (degrees) | address | integer bit | quadrant sign |
   |---|---|---|---|
   | exactly 90 | 0 | 1 | + |
   | exactly 270 | 0 | 1 | − |
   | 0 ≤ g < 90 | g | 0 | + |
   | 90 < g < 180 | 180 − g | 0 | + |
   | 180 ≤ g < 270 | g − 180 | 0 | − |
   | 270 < g < 360 | 360 − g | 0 | − |

6. **Odd symmetry.** For sine, the quadrant sign is XORed with the sign of
   the input, because sin(−t) = −sin(t). For cosine, the input sign is
   ignored.

The address is always 0 … 1799. At 90° and 270°, address 0 reads
sin 0 = 0 from the table, so the integer bit alone carries the value 1.0.

## The table (`sine_rom`)

Entry i holds round(sin(i·0.05°)·2¹⁶) for i = 0 … 1799, as a 16-bit word.
The last entries would round to 2¹⁶, which does not fit in 16 bits, so
they are held at 65535. Exact 1.0 comes only from the integer bit.

The table is computed while the design is elaborated, so no data file is
needed. `trig_pkg::sine_entry` sums the odd Taylor series of sin x up to
x¹⁷ in Q2.30 integer arithmetic (2 integer bits, 30 fraction bits). The
simulated testbench compares every entry with a real-valued
round(sin·2¹⁶), and all 1800 agree. The read is registered, like an FPGA
block RAM, and yosys infers a memory for it.

## Resolution parameter

`STEPS_PER_DEG` (default 20) sets the table resolution. The table depth
is 90·`STEPS_PER_DEG`, and all constants and widths follow from it. The
unit testbench also runs a 40-steps-per-degree instance (a 3600-word table)
against the same reference. The angle word keeps its 8 fraction bits, so
resolutions finer than 1/256° gain nothing.

## Timing of the unit (`trig_module`)

The unit is fully pipelined and accepts one angle per clock. It has three
stages:

1. The locator is combinational.
2. The table address register and a register carrying the sign and
   integer bit load at the first edge.
3. `supplement` registers the assembled result at the second edge.

An angle present before rising edge n gives its result after edge n+1
(`TRIG_LATENCY = 2`). `rst` is synchronous and active high. It clears the
result and the sign/integer register. The table output register is not
reset.

## Rotation system (`delta_module`)

It implements

    z1(k+1) =  cos γ · z1(k) + sin γ · z2(k)        (alpha_unit)
    z2(k+1) = −sin γ · z1(k) + cos γ · z2(k)        (beta_unit)
    γ = a · t0                                      (gamma_mult)

- **a** is 10 bits: signed, 9 fraction bits.
- **t0** is 4 bits: unsigned, 1 fraction bit.
- **γ** is their exact 14-bit product: sign, 3 integer and 10 fraction bits.
  It is read as degrees and sign-extended into an angle word, dropping its
  two lowest fraction bits.
- **sin γ and cos γ** come from two `trig_module` instances.
- **z1 and z2** are 18-bit two's complement Q2.16 words held in registers
  RZ1 and RZ2. Each product pair is summed at full precision, floored to 16
  fraction bits and saturated to 18 bits.

Handshake:

- In idle, a one-cycle `start` latches a, t0, `z1_init`, `z2_init` and
  `iterations`.
- At the third clock edge after start, z(1) is in RZ1/RZ2. After that, one
  new z comes every clock, marked by `z_valid`.
- `done` pulses with the last value. `busy` is high from the start edge
  to the end of the run.

The floor rounding and the 0.05° resolution of γ make the fixed-point orbit
drift away from the exact rotation. This drift is the cumulative error the
system is meant to show. With γ = 1° and z(0) = (1, 0), the orbit is
within 0.004 of the exact one over 1000 steps. With γ = −4.39°, it is
0.15 off after 200 steps. Most of that comes from resolving γ to −4.35°.

## Steady-state system (`steady_state_loop`)

It computes z(0) = sin(start angle), then z(k+1) = sin(128·z(k)), with
128·z read as degrees.

The multiplication is a wire shift. The result magnitude has 16 fraction
bits and the angle 8, so 128·z as an angle is the magnitude shifted right
by one bit. It is negated when z is negative.

One `trig_module` is fed from an angle register, and a new z appears every
three clocks (the latency plus one cycle to reload the register). The
handshake works like the rotation system's: z(0) appears at the third edge
after `start`, and `done` comes with z(iterations).

From sin 10°, the sequence overshoots and oscillates. It settles at
z = 0.89803 (exact iteration: 0.90247), a steady-state difference of
−0.49%.

## Files

| file | contents |
|---|---|
| `rtl/trig_pkg.sv` | formats, constants, `result_to_tc`, table formula |
| `rtl/compl_locator.sv` | angle → address, integer bit, sign |
| `rtl/sine_rom.sv` | quarter-wave table, registered read |
| `rtl/supplement.sv` | result assembly and output register |
| `rtl/trig_module.sv` | the sine/cosine unit |
| `rtl/gamma_mult.sv`, `rtl/alpha_unit.sv`, `rtl/beta_unit.sv` | parts of the rotation system |
| `rtl/delta_module.sv` | rotation system |
| `rtl/steady_state_loop.sv` | steady-state system |
| `rtl/trig_system.sv` | top level |
| `tb/trig_ref_pkg.sv` | real-valued reference for the testbenches |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb rtl/trig_pkg.sv tb/trig_ref_pkg.sv \
        tb/trig_system_tb.sv --top-module trig_system_tb
    ./obj_dir/Vtrig_system_tb

To run another test, replace `trig_system_tb` with that testbench's name.
Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog.

The results come from a reference that uses only the number formats:
real-valued sine of the resolved angle, rounded. It never uses quadrant
folding. The testbenches also check latency and throughput, and count the
cases they cover: every quadrant, negative angles, the integer bit, the
360° reduction and zero results.

`trig_system_tb` runs the top level at its default size. It streams 6000
angles through the stand-alone unit, runs 1000 rotation steps and runs 300
steady-state steps, all at the same time. It takes a few seconds.

## Choices where the source is silent, and differences

- **Pipeline and reset.** The two-clock latency, the registers and the
  synchronous reset are choices of this implementation. The original only
  quotes a worst-case computation time of about 30 ns on a Virtex-4.
- **Sin/cos select.** The encoding is 0 = sine, 1 = cosine.
- **Truncation.** Angles are truncated to the 0.05° grid, not rounded.
- **Table contents.** The word width (16 fraction bits) and depth are the
  original's. The rounding and the clamp at 65535 are choices.
- **Angles of 360° or more.** Such an angle first has 360° subtracted and
  is then folded like any other angle. Every angle up to 602° is therefore
  handled correctly.
- **Negative zero.** A zero result is never negative (0° and 180°).
- **Formats of a, t0 and z.** These, the floor rounding of the products,
  the saturation and reading γ in degrees are choices. Only the widths of
  a, t0 and γ are given.
- **Control logic.** The start/iterations/valid/done control of both
  systems is this implementation's own.
- **Steady-state error.** The original reports a 5.58% steady-state error
  and rise/settling times of 23/126 iterations against 4/141 for an exact
  computation. These are not reproduced: its exact rounding and its
  thresholds for rise and settling are not known. This implementation
  settles within 0.5% of the exact fixed point.
- **Separate modules.** The original draws the sine and cosine modules
  separately. Here they are one module with a select input. A fixed-function
  module is that module with `sel_cos` tied.
