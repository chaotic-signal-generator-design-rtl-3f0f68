# Digital chaotic signal generator

A chaotic oscillator is normally an analog circuit whose behaviour drifts with
its component values. This design replaces it with arithmetic: a three-variable
system of differential equations is turned into difference equations, and a
small network of fixed-point adders, multipliers and a logarithm table computes
one step of them after another. The state variable `u` is the chaotic output
sequence; in a complete instrument it feeds a D/A converter. The model constants
and the step length are input ports, so the signal can be retuned without
rebuilding anything.

Everything is synthesizable SystemVerilog. There are no vendor primitives: the
multipliers are built from logic, and the clock-enable scheme runs on a single
clock.

## The system being iterated

The continuous system is a Rössler-type oscillator with an extra logarithmic
term:

    du/dt = -v - w
    dv/dt =  u + a v + 0.1 u ln(w)
    dw/dt =  c + w (u - b)

Each step of length `h` is a two-stage (Runge-Kutta style) update. The first
stage gives the increments `Kv` and `Kw`, and the second stage re-evaluates the
right-hand side at the shifted point:

    u' = u - (v + w)(h + h·h/2)
    Kv = h/2 · (u + a v + 0.1 u ln w)
    v' = v + (Kv + h/2 · ((Kv + u) + a (Kv + v)))
    Kw = h/2 · (c + w (u - b))
    w' = w + (Kw + h/2 · (c + (w + Kw)((Kw + u) - b)))

The second stage of `v` has no logarithm, and it moves `v` by `Kv`, not by
`2·Kv`. The grouping of the sums shows the order in which the hardware adds.
Keep that order if you write a bit-exact model.

## Number format

All values are 20-bit two's complement with 12 fraction bits: one sign bit and
seven integer bits, so the range is -128 to +128 and the resolution is 1/4096. A
multiplier gives a 40-bit product. `chaos_pkg::prod_to_fix` brings it back to 20
bits: it shifts the product right by 12 and keeps the product's sign bit above
the low 19 bits of the shifted value. This is exact whenever the result is in
range. The low bits are truncated, which rounds toward minus infinity. A result
that is out of range wraps silently. Nothing saturates.

That range limits the constants you can use. With the textbook Rössler
constants (a = 0.2, b = 5.7, c = 0.2), `w` of this system climbs to about 50 and
the product `w(u - b)` reaches about 300. The format cannot hold that, and the
trajectory then breaks away. The testbenches use a = 0.2, b = 4, c = 0.2 and
h = 1/32. There every intermediate value stays below about 72 and the signals
stay within ±10. With these constants the 20-bit design follows a
double-precision evaluation of the same recurrence to within 0.02 for the first
60 steps. After that the two drift apart, as chaotic systems do. A larger step
(h = 1/16) lets `w` reach 40 and overflow the format. Check a new set of
constants in a floating-point model before you use it.

## The operator network

`chaos_generator` holds the state registers `u`, `v` and `w`. Three datapaths
read them:

| datapath | computes | operators |
|---|---|---|
| `u_path` | u' | 3 adders, 2 multipliers (`h·h/2`, `h + …`, `(v+w)·…`, `u − …`) |
| `v_path` | Kv, v' | 7 adders, 4 multipliers, 1 `log_calc` |
| `w_path` | Kw, w' | 8 adders, 4 multipliers |

Each operator is its own hardware instance. Nothing is shared or time-multiplexed.
Every operator registers its result and captures only while its clock enable is
high.

- An adder's result appears one clock after its enable.
- A multiplier's result appears four enabled clocks after its enable.
- `h/2` is `h` shifted right by one bit.
- The adders next to `b` subtract (carry-in set, operand inverted). The adders
  next to `c` add.

## Timing: frames, windows and the schedule

This is the part that needs the most care. The design runs on one clock. What
makes the operators run in the right order is their clock enables.

**Enable pulses.** Two `ce_divider` counters split the clock into frames of 20
cycles:

- The adder pulse is high in cycles 0–1 of every frame and low for the other 18.
- The multiplier pulse is high in cycles 0–4 and low for the other 15.

The wide windows are harmless. An operator whose inputs hold still simply
recomputes the same value: a second capture by an adder changes nothing. A
multiplier's four pipeline stages are full after four enabled clocks, and the
fifth clock recomputes the same product.

**Delays.** Two `shift_reg` delay lines of 19 stages delay each pulse. An
operator that starts at phase P takes the tap at delay `P mod 20` of its pulse
type.

**Iterations.** One iteration spans **two frames (40 cycles)**. A frame counter
gates each operator to frame `P / 20`. So every operator sees exactly one enable
window per iteration, and no window crosses a frame boundary.

Two frames are needed because the longest dependency chain does not fit in one.
The chain runs through `w`: adder, multiplier, adder, multiplier gives `Kw`, then
two adders, multiplier, adder, multiplier, adder and adder give `w'`. That is
23 cycles of delay plus the state load. With the multiplier windows kept inside
a frame, `w'` is ready at phase 26.

The phase table is `chaos_pkg::OP_PHASE`, indexed by `chaos_pkg::op_e`:

| phase | u | v | w |
|---|---|---|---|
| 0 | `v+w`, `h·h/2` | `a·v`, log table | `u−b` |
| 1 | | `u·0.1 ln w` | `w·(u−b)` |
| 4 | `h+…` | `u+a v` | |
| 5 | `(v+w)·(h+h²/2)` | `+ log term` | `+c` |
| 6 | | `·h/2` → Kv (ready at 10) | `·h/2` → Kw (ready at 10) |
| 9 | `u − …` → u' | | |
| 10 | | `Kv+u`, `Kv+v` | `w+Kw`, `Kw+u` |
| 11 | | `a·(Kv+v)` | `(Kw+u)−b` |
| 12 | | | `(w+Kw)·(…)` |
| 15 | | `+` | |
| 16 | | | `+c` |
| 20 | | `·h/2` | `·h/2` |
| 24 | | `Kv + …` | `Kw + …` |
| 25 | | `v + …` → v' | `w + …` → w' |
| 26 | **load u, v, w** | | |

**Why the results are loaded together.** `u'` is ready at phase 10, but
`v_path` and `w_path` read `u` until phase 25. So the three final adders write
their own output registers. The state registers take all three results
together in a two-cycle window at phases 26–27, and `valid` pulses in phase 27.
Every operator of an iteration therefore sees the same `u`, `v` and `w`.
Phase 0 is the clock period that ends with the first rising edge at which
`reset` is low. After it, a new state arrives every 40 cycles.

**How the windows stay safe.** Each operator fires once per iteration, and its
inputs come from operators that finished earlier in the same iteration. So every
input holds still during the windows that read it. When a multiplier's window
opens in the next iteration, its old product is still on the output for the
first three cycles. Its consumers have all finished by then.

**Changing the schedule.** Edit `OP_PHASE`, and `OP_IS_MUL` if you add an
operator. `sequencer` rejects at elaboration any window that crosses a frame.
`tb_sequencer` checks the rest: every producer-to-consumer pair starts only
after the producer's delay has passed, and the load comes after every other
operator.

## Arithmetic units

- **`adder20`** builds a ripple-carry adder from `full_adder` cells, bit 0
  first, so each cell passes its carry to the next. The `sub` input inverts `y`
  and sets the carry-in. The sum and the final carry are registered under `ce`.
- **`mult_ip`** is a signed shift-and-add multiplier. The multiplicand is
  sign-extended to 40 bits. For every set bit *i* of the multiplier, the
  multiplicand shifted left by *i* is added. The sign bit has weight −2¹⁹, so its
  partial product is subtracted. The 20 multiplier bits are handled five per
  pipeline stage over four stages, and all stages advance under `CE`. The ports
  are `A`, `B`, `Q`, `CE` and `CLK`.
- **`log_lut`** returns 0.1·ln(w) as a table look-up. The table is not one entry
  per input value. A leading-one detector writes w = 2^(p−12)·(1 + m/64 + …),
  and the output is the sum of two small tables:
  - `EXP_TAB[p] = round(4096·0.1·(p−12)·ln 2)`, with 19 entries
  - `MAN_TAB[m] = round(4096·0.1·ln(1 + (m+0.5)/64))`, with 64 entries

  Both are filled at elaboration from these formulas. The error is at most
  4 LSB (about 0.001). An argument w ≤ 0, where the logarithm is undefined, is
  treated as 1/4096.
- **`log_calc`** registers the table value (one cycle) and multiplies it by `u`
  in a `mult_ip` (four cycles). This gives the term 0.1·u·ln(w) of `Kv`.

## Top-level ports (`chaos_generator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | the single clock |
| `reset` | in | 1 | synchronous, active high. Loads `u0`, `v0`, `w0` and restarts the schedule |
| `a`, `b`, `c` | in | 20 | model constants, Q7.12 |
| `h` | in | 20 | step length, Q7.12 (for example 128 = 1/32) |
| `u0`, `v0`, `w0` | in | 20 | initial state (`w0` must be > 0) |
| `u`, `v`, `w` | out | 20 | current state. `u` is the output signal |
| `valid` | out | 1 | one-cycle pulse: `u`, `v`, `w` have just been updated |
| `frame` | out | 1 | which 20-cycle frame of the iteration is running |

Hold the constants steady while the generator runs. To change them, change
them and pulse `reset`. One new sample comes every 40 clocks.

## Where this design departs from the original description

- **Iteration length.** The original quotes adder and multiplier delays of 1
  and 4 cycles, and a 20-cycle operation period. Its own operator network needs
  23 cycles for one step. Here the 20-cycle period is kept for the enable pulses
  (2 and 5 cycles high), and one step takes two periods.
- **Schedule, delay-line taps, frame counter and state load.** Only the idea is
  given: staggered enables, divided clocks and shift registers to keep u, v and
  w in step. The concrete schedule is this design's own.
- **Word width.** The word is 20 bits with 12 fraction bits. One passage of the
  description suggests a different split of the 20 bits, and its simulation
  traces use 18-bit words. The 12-bit fraction agrees with the multiplier's
  12-bit shift and with the printed output magnitudes.
- **Sign of the `c` adders.** The operator diagram labels the `c` input of the
  `w` adders as −c. The equations use +c, and this design follows the equations.
  The `u` update subtracts its product, as the equations require.
- **Model constants and start state.** Neither is given. They are ports here.
- **Multiplier realisation.** The original targets a Spartan-3 FPGA and mentions
  its hardware multipliers. `mult_ip` is plain logic, so a synthesis tool will
  not map it to those multiplier blocks unless you replace it with a `*`-based
  version or a vendor core with the same ports and a 4-cycle delay.
- **Logarithm table.** It is split into exponent and mantissa tables instead of
  one direct case table.
- **Not included.** The D/A converter board (a differential-output DAC followed
  by an op-amp stage) and the FPGA board are not included. Connect `u` to your
  converter. If it needs offset binary, invert bit 19.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_adder20` | corner cases and random sums and differences; carry; one-cycle delay; hold |
| `tb_mult_ip` | the worked examples ±14·11 = ±154, the most negative operands, random operands; product after exactly 4 enabled clocks; hold |
| `tb_shift_reg` | 4-deep 1-bit and 3-deep 20-bit delay, every tap |
| `tb_ce_divider` | 2-of-20 and 5-of-20 patterns from reset |
| `tb_log_lut` | against double-precision 0.1·ln(w) over all powers of two and random w, tolerance 5 LSB; w ≤ 0 |
| `tb_log_calc` | against 0.1·u·ln(w) in floating point and bit-exact; 5-cycle delay; hold |
| `tb_sequencer` | hand-written windows, every operator's window in every iteration, all data dependencies, frame output |
| `tb_u_path`, `tb_v_path`, `tb_w_path` | random states and constants, driven by their own schedule, bit-exact against the reference model at the phase where the result must appear |
| `tb_chaos_generator` | whole generator at default sizes (details below) |

`tb_chaos_generator` runs 3,000 steps, then a reset with a new start and a
smaller step (h = 1/64) and 1,500 more steps. For every step it checks:

- the state, bit-exact against the reference model;
- the timing of `valid`;
- the range of the signals.

For the first 60 steps it also checks the state against double precision. It
counts the design's mechanisms and fails if any never happened: iterations,
operators in the second frame, sign changes of `u`, `w` on both sides of 1
(both halves of the log table), and restart with a new `h`.

`tb_chaos_ref_pkg` is the reference model. It uses plain integer arithmetic
only. `tb_path_sched.svh` makes the operator enables for the datapath
testbenches straight from the phase table.

## Simulating

Run each command from the directory that holds `rtl/` and `tb/`, with Verilator
5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/chaos_pkg.sv tb/tb_chaos_ref_pkg.sv tb/tb_chaos_generator.sv \
        --top-module tb_chaos_generator
    ./obj_dir/Vtb_chaos_generator

Replace the testbench name to run another test. `tb_full_adder`,
`tb_adder20`, `tb_mult_ip`, `tb_shift_reg` and `tb_ce_divider` need only their
own file plus the `-y` paths. The full generator test takes a few seconds. To
watch the chaotic waveform, print `u` whenever `valid` is high. Converted to a
real number (divide by 4096), it oscillates irregularly between about −8
and +9.

## Files

- `rtl/chaos_pkg.sv`: format, timing constants, operator list and phase table
- `rtl/chaos_generator.sv`: top level
- `rtl/sequencer.sv`, `rtl/ce_divider.sv`, `rtl/shift_reg.sv`: enable generation
- `rtl/u_path.sv`, `rtl/v_path.sv`, `rtl/w_path.sv`: datapaths
- `rtl/adder20.sv`, `rtl/full_adder.sv`, `rtl/mult_ip.sv`, `rtl/log_calc.sv`,
  `rtl/log_lut.sv`: arithmetic units
- `tb/`: testbenches, the reference model package and the shared schedule
  include
