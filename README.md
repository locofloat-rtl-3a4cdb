# LOCOFloat buck-converter HIL model

A hardware-in-the-loop (HIL) simulator replaces a power converter by a
digital model that runs in real time next to the controller under test.
Each clock cycle the model has to take one integration step of the
converter's differential equations. Fixed-point arithmetic makes such a
model small and fast, but the designer has to plan the range of every
signal. IEEE-754 floating point removes that burden. In single precision it
can lack resolution: a small step increment gets lost against a large state
value. Double precision uses many DSP blocks.

This RTL uses **LOCOFloat** ("low-cost floating point"), a number format
between the two, and uses it to build a real-time Explicit-Euler model of a
synchronous buck converter with losses:

- A number is a two's-complement integer significand plus an 8-bit
  two's-complement *point location*.
- There is no hidden bit and no rounding. There are no NaN or infinity
  checks.
- Normalization is not done inside the operators. It is spread over clock
  cycles in the state registers ("soft normalization").

All of it is synthesizable SystemVerilog with no vendor primitives.

## The number format

    value = significand * 2^(-point_location)

The point location counts the significand's fractional bits. A higher point
location means a *smaller* number, the opposite of an IEEE exponent. A
negative point location means the binary point lies beyond the LSB.
Examples:

| significand | point location | value |
|---|---|---|
| 1225 (12 bits) | 5 | 38.28125 |
| -312 (16 bits) | 7 | -2.4375 |
| 2041 (12 bits) | 46 | 2.9e-11 |

The significand width is free per signal. The point location is always
8 bits (-128..+127). The buck model uses two widths:

- **8/50**: the two state variables (inductor current, capacitor voltage)
  have 50-bit significands. This is about the resolution of a double.
- **8/25**: every other signal has a 25-bit significand. A 25x25 product
  fits the 25x18 multipliers of common FPGA DSP slices in two slices.

The same number has many encodings: 4.5 is `0001001` at point location 1,
`0010010` at 2 or `0100100` at 3. The best encoding for later additions is
the one with the most fractional bits. That is a significand starting `01`
(positive) or `10` (negative).

`loco_pkg` defines `loco25_t` and `loco50_t` as packed structs
`{sig, pl}`, with `sig` in the upper bits.

## Arithmetic units

### Adder/subtractor (`loco_addsub`)

Before two numbers can be added, their binary points must line up.

1. `loco_shift_ctrl` subtracts the point locations. The operand with more
   fractional bits (higher point location) must move right by the
   difference. Moving the other operand left could overflow, so it never
   moves. Example: point locations 15 and 3 make operand 1 shift 12 places,
   so Sh5..Sh0 = `001100`.
2. Each operand has its own `loco_barrel_shifter`. This is six fixed
   shifters of 32, 16, 8, 4, 2 and 1 places in series, each enabled by one
   bit Sh5..Sh0. So shifts run from 0 to 63 places. The shift is arithmetic
   (sign-filling) and truncates the bits shifted out.
3. The aligned significands are added or subtracted one bit wider than the
   operands. The result's point location is the lower of the two.
4. `loco_ovf_ctrl` checks the top two bits of the sum. If they differ, the
   sum does not fit in the operand width. It is then shifted right one place
   and its point location lowered by one. This is one multiplexer and a -1
   adder.

Operands of different widths are allowed. The narrower one is first
left-aligned to the wider width by `loco_resize`: zero LSBs are appended
and the point location is raised by the same amount, which is exact. The
default instance is 50 + 50 bits.

### Multiplier (`loco_mul`)

The significands multiply directly as integers. No alignment is needed, and
the full product (WA+WB bits) cannot overflow. In parallel, the point
locations add. The point-location sum saturates at -128/+127; see "Zero"
below. The buck model keeps only the top 25 bits of each 25x25 product.

### Soft normalization (`loco_soft_norm`, `loco_state_reg`)

This is the format's least obvious idea. Full normalization after every
operation would need a leading-zero counter and another barrel shifter in
every operator. LOCOFloat instead normalizes only values written into the
state registers, and only by **one bit per clock**:

| leading bits | action |
|---|---|
| `00` (positive, redundant sign bit) | shift left 1, point location +1 |
| `11` (negative, redundant sign bit) | shift left 1, point location +1 |
| `01`, `10` | keep |

Right shifts are never needed here: the adders already shift right on
overflow. State variables change little from step to step, so one bit per
step keeps them normalized. The exception is a value that changes by more
than a factor of two in one step; it then spends a few steps in a slightly
worse encoding.

`loco_state_reg` is a register with one such step in front of its D input.
It loads when `en` is high.

### Zero, and moving between widths

Zero needs care in an alignment-based format. A zero at a *low* point
location looks like a huge-range number. Adding it to a real value would
shift that value right and destroy its precision. This design therefore
keeps zero at point location +127:

- The soft normalizer stops shifting at +127, so a zero climbs there and
  stays.
- Registers reset to zero at +127.
- The multiplier saturates its point-location sum, so zero times anything
  stays at a high point location.
- When a 25-bit number is widened and its point location would pass +127,
  it is flushed to zero at +127. This affects magnitudes below about
  2^-102.

`loco_resize` moves a number between widths:

- **Narrowing** (50 to 25 bits, where a state variable enters the 25-bit
  datapath) keeps the top bits and lowers the point location.
- **Widening** left-aligns.

Narrowing an unnormalized 50-bit value would lose its significant bits.
Left alignment on widening avoids that: the first non-zero increment added
to a zero state arrives already normalized.

Without these rules the model never leaves its reset state. Apart from them,
point-location arithmetic wraps at 8 bits, and no range checks exist.

## The buck converter model (`loco_buck_hil`)

One clock cycle is one Explicit-Euler step of length dt. The inputs dt/L
and dt/C set the step size and component values at run time:

    iC   = iL - iR
    vout = vC + iC*RC
    vL   = (switch-node term) - vout - iL*R - (diode term)
    iL  <= iL + (dt/L) * vL
    vC  <= vC + (dt/C) * iC

The gate inputs `hsm`/`lsm` and the sign of iL pick the conduction state
(output `mode`):

| state | condition | vL |
|---|---|---|
| `MODE_HS` | hsm on | vin - vout - iL*r_hs |
| `MODE_LS` | lsm on | -vout - iL*r_ls |
| `MODE_DIODE_HS` | both off, iL < 0 | vin - vout - iL*r_d - v_d |
| `MODE_DIODE_LS` | both off, iL > 0 | -vout - iL*r_d - v_d |
| `MODE_OPEN` | both off, iL = 0 | 0 |

The datapath holds:

- seven adder/subtractors: iC, vout, vin-vout, loss subtraction, diode
  drop, and the two state updates;
- four 25x25 multipliers: RC*iC, iL*R, (dt/L)*vL and (dt/C)*iC;
- a "closed switch" multiplexer that picks vin-vout or -vout;
- a loss-resistance multiplexer;
- a final multiplexer that picks the real, diode or zero inductor voltage;
- two soft-normalizing 8/50 state registers.

There is no pipelining, because every step needs the previous step's
states. The longest path runs from the vC register through vout, vin-vout,
the loss subtraction and (dt/L)*vL into the iL adder.

Each resistance input already includes the inductor's series resistance
RL:

- `r_hs` = RL + Rdson of the high-side switch
- `r_ls` = RL + Rdson of the low-side switch
- `r_d` = RL + RD (diode resistance)

Ports (`loco25_t` = 33 bits, `loco50_t` = 58 bits):

| port | dir | type | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset (states to zero) |
| en | in | 1 | take a step this cycle |
| hsm, lsm | in | 1 | gate signals |
| vin, i_r | in | loco25_t | input voltage, load current |
| dt_l, dt_c | in | loco25_t | dt/L, dt/C |
| r_c, r_hs, r_ls, r_d, v_d | in | loco25_t | ESR, loss resistances, diode drop |
| i_l, v_c | out | loco50_t | state registers |
| v_out | out | loco25_t | output voltage (combinational) |
| mode | out | cond_mode_t | conduction state used by this step |
| ovf | out | 7 | overflow correction in each adder this step |
| norm_shift | out | 2 | soft-normalization shift on {vC, iL} this step |

The load is outside the model. A resistive load is emulated by feeding
`i_r = vout(k-1)/Rout` each step.

The published implementation of this model reached a step of about 39 ns on
a small Xilinx Zynq-7010 using 8 DSP blocks. A double-precision version used
50 DSP blocks. This RTL has not been through FPGA implementation; timing and
resources are unverified.

## Where this RTL makes its own choices

The arithmetic, the soft normalization rule, the 8/25 and 8/50 widths and
the model equations follow the published description. These details are
this design's own:

- **Zero handling**: zero at point location +127, a saturating multiplier
  point location, and flush to zero on widening (see above).
- **Width conversion**: narrowing truncates and widening left-aligns.
  Products are narrowed to 25 bits by truncation.
- **Shift saturation**: a point-location difference above 63 shifts 63
  places. For operands of at most 63 bits that leaves only sign bits.
- **Overflow detection** from the top two bits of the one-bit-wider sum.
- **Loss inputs**: three resistance inputs and a diode-voltage input. The
  published block diagram shows two resistance inputs; its equations also
  use a diode resistance and a diode voltage.
- **Diode sign**: v_d is *subtracted* in both diode states, as the model's
  equations are written. For iL < 0, a physical high-side diode drop would
  add v_d instead. Change the select of `v_ind` in `loco_buck_hil` if you
  need that.
- **Shoot-through** (both gates on) is treated as high-side on.
- The `en` input, the reset values, and the status outputs `mode`, `ovf`
  and `norm_shift`.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| tb_loco_barrel_shifter | all 64 shift amounts, random and corner words, against a floor division |
| tb_loco_shift_ctrl | the 15/3 -> `001100` example, saturation, random pairs |
| tb_loco_ovf_ctrl | overflow detection, halving, point location -1 |
| tb_loco_resize | 50->25 truncation (value within 1 LSB), 25->50 left alignment and flush |
| tb_loco_addsub | 50+50 and 50+25 units against an integer reference model and against real arithmetic |
| tb_loco_mul | exact 50-bit products, 25-bit truncated products, point-location sums |
| tb_loco_soft_norm | the three rows of the normalization table, random values, zero at +127 |
| tb_loco_state_reg | reset, hold, and convergence at exactly one bit per clock |
| tb_loco_buck_hil | full model (default widths) vs. a double-precision Euler model, every cycle |
| tb_loco_buck_cases | six published buck designs from switch-off to near steady state |

`tb_loco_buck_hil` uses a 5.4 V to 4.5 V, 20 W design stepped at 40 ns.
After 3750 steps it cuts the load to 1 %, so the inductor current goes
negative. It fails unless every mechanism occurs at least once:

- all five conduction states;
- an adder overflow correction;
- a soft-normalization shift;
- the zero state at +127.

`tb_loco_buck_cases` covers six designs from 0.27 W to 250 W and 150 to
700 kHz. It uses a 40 ns step and runs 2,000 to 150,000 steps per case. In
both benches the LOCOFloat states stay within 0.01 % of the double-precision
model run with the same step; the largest deviation seen is 5e-3 % of the
nominal inductor current.

Losses are not part of the published case table. The benches use
RL = Rdson = 10 mohm, RD = 20 mohm, vD = 0.7 V, RC = 10 mohm and one step of
dead time.

To run a testbench with Verilator 5:

    verilator --binary --timing --top-module tb_loco_buck_hil \
      -Irtl -y rtl -y tb +libext+.sv \
      rtl/loco_pkg.sv tb/loco_tb_pkg.sv tb/tb_loco_buck_hil.sv
    ./obj_dir/Vtb_loco_buck_hil

Replace the top module and last file for another testbench. `loco_tb_pkg`
converts between `real` and LOCOFloat (`to_loco25`, `real25`, `real50`),
which is also the easiest way to drive the model from your own bench.

## Limits

- The point location wraps outside -128..127, except where the zero rules
  above saturate it. A value above about 2^103 would corrupt silently.
- Truncation everywhere means errors are biased slightly towards minus
  infinity. In the runs above this stayed below the 0.01 % bound.
- The model is open loop: it takes the gate signals as inputs. Whatever
  generates them (the controller under test, or the PWM in the testbenches)
  is not part of this RTL.
