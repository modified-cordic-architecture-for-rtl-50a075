# Fixed-angle CORDIC rotator with one shared adder

This rotator turns a 2-D vector through a known angle of 0 to 45 degrees. Given a start
vector of (K_A, 0), it returns the cosine and sine of the angle.

A general CORDIC needs one micro-rotation per bit of precision. It also needs an angle
datapath that decides each micro-rotation's direction as it goes. When the angle is known
in advance, that work can be done once and stored. Every whole angle from 1 to 45 degrees
is written as the sum of at most four elementary angles ±atan(2^-k). The shift counts k
and the signs of those elementary angles are kept in a ROM. The rotation is then just
four shift-and-add steps, with no angle arithmetic at run time.

The second idea is about area. A textbook CORDIC has one adder/subtractor and one shifter
for x and a second pair for y. This design has a single adder/subtractor and a single
barrel shifter. Each micro-rotation therefore takes two clock cycles:

- In the first cycle, the adder computes the new x.
- In the second cycle, the same adder computes the new y.

A pair of multiplexers (the "line changer") swaps which register goes straight to the
adder and which goes through the shifter. A small two-word memory keeps the new x until
the new y exists. Only then does it hand both back to the X and Y registers.

## Number format and angles

- Coordinates are 14-bit two's complement with 12 fraction bits (Q2.12). So 1.0 is 4096
  and the range is -2.0 to +1.99976. With the default start vector (K_A, 0), the outputs
  are cos·4096 and sin·4096. For example, 31° gives 3510 and 2111; the exact values are
  3511.0 and 2109.6.
- `angle` is a whole number of degrees from 0 to 45 (6 bits).
- The table has one row per odd angle. An even angle 2n is served with the row of 2n+1,
  so requests for 30° and 31° both give a 31° rotation. A request for 0° gives 1°.
- `negate` inverts every sign bit, which rotates through −angle instead.
- Angles above 45 raise an assertion in simulation. The ROM holds no micro-rotation for
  them and a K_A of 1.0, so the vector comes out unchanged.
- To reach any angle from 0 to 360°, use the usual octant symmetries outside this block:
  swap x and y and change their signs. That mapping is not built here.

## The micro-rotation table

Micro-rotation *i* of an angle applies:

    x' = x − σ·(y >>> k(i))
    y' = y + σ·(x >>> k(i))        σ = +1 when the stored sign bit s(i) = 1, −1 when s(i) = 0

In each row, Σ σ(i)·atan(2^−k(i)) is within 0.04° of the row's angle. For example:

- 35° = 3·atan(1/4) − atan(1/8). A shift count may repeat within a row.
- 45° is a single micro-rotation with k = 0.

Rows with fewer than four micro-rotations mark the unused slots invalid. Those slots
still take their two cycles, but pass the value through unchanged.

Every micro-rotation also lengthens the vector by a factor of sqrt(1 + 2^−2k). Each angle
therefore has its own start value:

    K_A = 1 / Π sqrt(1 + 2^(−2·k(i)))

Starting from (K_A, 0) gives a result of unit length. K_A ranges from 0.7018 (37° and 39°)
to 0.9999 (1°). The ROM holds the published four-digit K_A values. Those values agree with
the formula to within 0.0006. The rows for 43° and 45° have no published value and use the
formula instead (0.7068 and 0.7071).

Both tables are built from these rows during elaboration, by constant functions in
`cordic_pkg`. They become two packed constants of 64 entries: 64 × 4 × {valid, sign, k[3:0]},
and 64 × 14 bits for K_A.

## Datapath and schedule

```
            Reg X ──┬─────────────┐        ┌──── Reg Y
                    │   line changer (S)   │
                    └──► direct ─┐  ┌─ to shifter ◄──┘
                                 │  │
                                 │  >>> k(i)   (from ROM)
                                 ▼  ▼
                           adder/subtractor ◄── sign bit s(i) (SBR)
                                   │
                           cos/sin memory  ── x_out, y_out
                                   │ (pair release)
                                   └──► Reg X, Reg Y
```

In `cordic_ctrl`, a 3-bit counter steps through 8 cycles, two per micro-rotation slot:

| counter | S | slot | direct input | through the shifter | operation         | stored in         |
|---------|---|------|--------------|---------------------|-------------------|-------------------|
| even    | 1 | c/2  | X            | Y                   | X − σ·(Y >>> k)   | memory x word     |
| odd     | 0 | c/2  | Y            | X                   | Y + σ·(X >>> k)   | memory y word     |

So the adder subtracts when S equals the sign bit, and adds otherwise. X and Y keep their
old values through both cycles, so the y update uses the old x, as the recurrence
requires. On the clock edge that stores the y word, the memory releases the pair: Reg X
takes the stored x word and Reg Y takes the incoming y word on that same edge. No cycle is
spent on the transfer. After the eighth step, the memory holds the result. Its two words
drive `x_out` and `y_out`.

The sign-bit register (`sbr`) captures the row's four sign bits when the rotation starts,
inverting them if `negate` is set. The angle is held in a register, so the ROM supplies
k(i) and the valid flag throughout the rotation.

## Interface and timing (`modified_cordic`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | rising-edge clock; asynchronous active-low reset |
| `start` | in | 1 | begin a rotation; only taken while idle |
| `angle` | in | 6 | degrees, 0..45; sampled with `start` |
| `negate` | in | 1 | rotate through −angle |
| `load_ka` | in | 1 | 1: start from (K_A, 0), so the result is (cos, sin); 0: start from (`x0`, `y0`) |
| `x0`, `y0` | in | 14 | start vector, Q2.12 |
| `busy` | out | 1 | the eight datapath steps are running |
| `done` | out | 1 | one-cycle pulse; the result is on `x_out`/`y_out` |
| `x_out`, `y_out` | out | 14 | result, Q2.12; held until the next rotation writes |

Say `start` is sampled on clock edge 0. Then the steps occupy edges 1 to 8, and `done` is
high between edges 8 and 9. Counting the start cycle, that is 9 cycles. A new `start` may
be given in the `done` cycle, so rotations can run back to back, one every 9 cycles.

With `load_ka = 0`, the result is the rotated vector multiplied by the gain 1/K_A, which
is between 1.0 and 1.42. To get an unscaled result, pre-scale the input by K_A. Vectors of
length up to 1.25 do not overflow.

## Files

| file | contents |
|------|----------|
| `rtl/cordic_pkg.sv` | sizes, types, the micro-rotation table and the K_A table |
| `rtl/cordic_rom.sv` | angle-addressed ROM giving the four micro-rotations and K_A |
| `rtl/sbr.sv` | sign-bit register |
| `rtl/line_changer.sv` | straight/crossed line switch (the two operand multiplexers) |
| `rtl/barrel_shifter.sv` | arithmetic right shift by k, log2 stages of 2:1 multiplexers |
| `rtl/addsub.sv` | adder/subtractor with a pass-through for unused slots |
| `rtl/cs_memory.sv` | two-word result memory with pair release |
| `rtl/cordic_ctrl.sv` | idle/run sequencer with the 3-bit step counter |
| `rtl/modified_cordic.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The package must come
first. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/cordic_pkg.sv \
    tb/tb_modified_cordic.sv --top-module tb_modified_cordic
./obj_dir/Vtb_modified_cordic
```

`tb_modified_cordic` runs the top at its default sizes:

- cos/sin for every angle from 0 to 45°, in both directions, back to back;
- 400 random vectors of length up to 1.2 through random angles;
- starts given while the rotator is busy, which must be ignored.

Each result is checked two ways:

- bit for bit against an integer model of the recurrence;
- against real trigonometry, to within 0.003 for cos/sin, and to within 0.004 for rotated
  vectors after allowing for the gain.

The testbench also checks the 9-cycle latency. It counts each mechanism and fails if one
never occurs: negated angles, unused slots, repeated shift counts, even angles, pair
releases, back-to-back starts and ignored starts.

`tb_cordic_rom` checks each ROM row against its own sum of atan values and its gain
formula. It does not simply compare the ROM with a copy of itself.

## Where this implementation makes its own choices

- **Shift direction.** The published block diagram of the shared datapath labels its
  shifter with a left shift and only the two-rotation amounts (0 or k(1)−k(0)). This design
  shifts right by the full k(i) of up to four micro-rotations. That matches the CORDIC
  recurrence and the four-micro-rotation table.
- **Arithmetic shift.** The published synthesis figures list logical right shifters. Here
  the shift is arithmetic, because coordinates go negative.
- **Component count.** The published synthesis figures for the shared design count 32
  adders and 8 shifters. This implementation has exactly one adder/subtractor and one
  shifter, as the block diagram shows. Its measured area and delay are not comparable to
  those figures.
- **Flip-flops instead of latches.** Storage uses edge-triggered flip-flops with an
  asynchronous reset. The published figures report latches.
- **Fixed schedule.** Every rotation takes 8 steps. Unused slots pass the value through
  rather than cutting the rotation short.
- **Interface.** The `start`/`busy`/`done` handshake, the `negate` input, the external
  start vector, and the handling of even angles and angles above 45° are all this
  design's own.
