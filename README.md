# Serial digital integrator (DDA cell), 5-bit, bit-serial

A digital integrator approximates `z = ∫ y dx` by accumulating increments.
Nothing in it holds `z`. The cell holds the integrand `y` and a remainder `R`.
Every iteration it adds `+y` or `−y` to `R`, depending on the sign of the
incoming `dx` increment. The carry out of that addition, an overflow of `R`, is
the output increment `dz`. Many such cells wired together, each one's `dz`
driving another's `dx` or `dy`, form a digital differential analyzer. Such a
network can solve differential equations, multiply and generate functions.

This RTL implements that cell as a synchronous bit-serial machine. Words are
5 bits long. Each word moves one bit per clock pulse, least significant bit
first. The circuit has four kinds of part: a two's complementer, a serial adder
with one bit of carry storage, an overflow stage, and a 5-stage shift register.
All gates are written as two-output OR-NOR elements. The structure, the logic
equations, the word length and the bit timing follow a bit-serial integrator
design built from fluid-amplifier logic elements. The choices this
implementation had to make are listed in [Departures and choices](#departures-and-choices).

## Numbers: biased words and overflows of ±16

Each 5-bit word `w` stands for the value `w − 16`. So `00000` is −16, `10000`
is 0, `11111` is +15 and `10101` is +5. To negate a number, form the two's
complement of its word: `01011` is −5.

Every iteration produces exactly one overflow pulse:

* a `+dz` pulse when adding `Y_C` to `R` carries out of bit 4;
* a `−dz` pulse when it does not.

Each pulse counts ±16. A zero output is therefore a steady alternation of `+dz`
and `−dz`, not silence. The integral so far is `16 × (number of +dz − number of −dz)`,
give or take the remainder still held in `R`.

The increment inputs follow the same rule. `dx = 1` means +dx and `dx = 0`
means −dx, and likewise for `dy`. To hold a variable constant, alternate its
input every iteration.

Example, y = +5 (`10101`) held constant, R cleared, dx present:

| iteration | R before | R after | overflow |
|-----------|----------|---------|----------|
| 1 | 00000 | 10101 | −dz |
| 2 | 10101 | 01010 | +dz |
| 3 | 01010 | 11111 | −dz |
| 4 | 11111 | 10100 | +dz |

Over many iterations, `+dz : −dz` tends to 21 : 11 ≈ 1.9. The net count grows by 5/16 per iteration.

## Iteration timing

A single clock `clk` drives everything. One iteration lasts `WIDTH + GAP` clock
periods, six with the defaults:

```
period   0    1    2    3    4    5
         T1   T2   T3   T4   T5   gap
t        1    1    1    1    1    0
t1       1    0    0    0    0    0
read     0    0    0    0    0    1
reset_p  0    0    0    0    0    1
```

* **Bit times T1..T5.** In bit time *k*, bit *k* of each word is on the serial
  wires. All serial logic is combinational within a bit time. Storage changes at
  the `clk` edge that ends a bit time, and only when `t` is high.
* **READ.** During the gap, READ gates the stored final carry onto `dz_pos` or
  `dz_neg`. The pulse is combinational and one clock wide.
* **RESET.** At the edge that ends the gap, RESET clears the adder's carry and
  returns the complementer to pass mode. The overflow has been read from the
  carry by then, because READ and RESET share the period.

The gap of one period makes an iteration 6 clocks long, not 5. At a 102 Hz bit
clock, 10 s gives 170 iterations, so 170 overflows rather than 204. The
shift-register contents are a complete word only between iterations.
`timing_generator` makes these pulses. Its `run = 0` input stops the clock, and
all registers then hold their words.

## The circuits

### OR-NOR element and half adder (`or_nor`, `half_adder_stage`)

Every gate is one two-input element with an OR output and a NOR output. A half
adder takes three of them:

* **Element 1** takes `¬a`, `¬b`. Its NOR output is the carry `a·b`. Its OR
  output is the carry's complement.
* **Element 2** takes `a`, `b`. Its NOR output `¬a·¬b` is used.
* **Element 3** takes the two NOR outputs above. Its OR output is `a XNOR b`,
  the complemented sum. Its NOR output is the sum `a ⊕ b`.

The same three-element stage is also the complementer's logic.

### Register stage (`register_stage`)

This is the one-bit store, used for carries, the complementer's state and the
shift register. Two gates pass `d` and `¬d` only while `t` is high. The gate
that conducts sets or clears a flip-flop. `preset` forces the stored bit. The
adder and complementer use `preset` for the per-iteration RESET. The shift
register uses it to insert an initial word.

### Serial adder and overflow stage (`serial_adder`)

Half adder 1 adds `a` and `b`. Half adder 2 adds that partial sum to the carry
stored from the previous bit. The two carries are ORed and stored, so a
carry-out becomes the next bit's carry-in. After T5 the carry store holds the
carry out of the top bit, and READ turns it into `+dz` or `−dz`.

Worked example: 5 + 21 = 26. The carry-in is 1 in the 2s and 8s bit times, and the result gives `−dz`.

### Complementer (`complementer`)

This block passes the serial word unchanged when `ctrl` (dx) is present. When
`ctrl` is absent, it outputs `(32 − N) mod 32`. The rule used is the usual
serial one: low-order zeros and the first one pass unchanged, and every later
bit is inverted.

A stored bit `D` starts each iteration at 1, set there by RESET. The output is
`G = D XNOR E`. The next `D` is `F = D·¬E`, ORed with `ctrl`, so `D` drops one
bit time after the first 1 has passed. `G` and `F` are the sum and carry of one
half-adder stage fed with `D` and `¬E`.

Example: `10101` complements to `01011`. The serial output over T1..T5 is 1, 1, 0, 1, 0.

### Shift register (`shift_register`)

`WIDTH` register stages sit in series. Bits enter at FF1 and leave at FF5, so a
word appears at the output exactly one iteration after it went in. Between
iterations, FF1 holds the MSB and FF5 the LSB; the `contents` output shows the
word in that order. `load` presets all stages at once.

### Half and complete integrator (`time_integrator`, `digital_integrator`)

`time_integrator` is one half of the cell. Its parts are wired in a loop: the
complementer feeds the adder, the adder's sum `R_L` feeds the register, and the
register output `R` feeds back to the adder. It has one test mode. When
`open_loop` is high, the adder's second operand is the constant word `00000` or
`11111`, chosen by `r_force`, instead of `R`. The half then works as a plain
adder or subtractor whose result still shifts through the register.

`digital_integrator` joins two identical halves:

* **y half.** Its complementer is fed the unit word `00001`, a 1 in T1 only.
  So each iteration adds +1 to `y` (dy present) or `11111` = −1 (dy absent).
  Its adder output `Y_L` is the updated `y`. `Y_L` goes back into the y register.
* **R half.** In the same bit time, `Y_L` also goes to the R half's
  complementer. The R half adds ±`Y_L` to `R` and produces `dz`.
* The y half's overflow outputs are not used.

### Sine/cosine pair (`dda_sincos`)

This is two complete integrators in a loop:

* **Integrator S** holds cos θ in its y register. Its overflows are Δsin θ.
* **Integrator C** holds −sin θ in its y register. Its overflows are Δcos θ.
* Δcos drives S's `dy`. Inverted Δsin drives C's `dy`. Both take Δθ as `dx`.

A one-bit latch per integrator holds the sign of the overflow taken at READ. It
drives the other integrator's input through the next iteration. Both latches
reset to "+".

With 5-bit words and `y` stepping by ±1 every iteration, the result is a coarse
oscillation, not an accurate sine. The block shows how cells interconnect. It is
not a precision function generator.

The same loop solves `y'' + y = 0`, whose solution is `y = cos x`. One variant
feeds −dx to the first integrator instead of inverting Δsin on the way to the
second; the two arrangements are equivalent, though not bit for bit.

### Exponential generator (`dda_exp`)

A single integrator whose output is its own `dy`. Each `dZ = Z·dx` overflow
moves `Z` by one, so `Z` changes in proportion to itself: with `dx` present
it grows like `e^x`, and with `dx` absent it decays towards zero. A latch
holds the sign of the last overflow and feeds it to `dy` through the next
iteration, as in the sine/cosine pair. `load` presets `Z`, clears `R` and sets
the latch to "+".

Starting from Z = +2 with dx present, Z reaches +15 after 33 iterations. With
the growth rate `Z/16` per iteration, that is roughly 16·ln(7.5) iterations.
Nothing stops Z at +15: the next step wraps it to −16.

### Multiplier (`dda_multiplier`)

This uses `xy = ∫y dx + ∫x dy`. One integrator holds `y` and integrates it
over `x`. The other holds `x` and integrates it over `y`: its `dx` is the
network's `dy`, and the other way round. A signed up/down counter
(`COUNT_BITS = 16`) adds +1 for every `+dz` and −1 for every `−dz` of both
integrators, so it moves by −2, 0 or +2 per iteration. Each count is worth 16,
so the counter holds `xy/16`. Example: x and y both start at 0 and both step
up for 15 iterations. The counter then reads 14, against 15·15/16 = 14.06.

### Attitude-control map (`dda_attitude`)

Six integrators mechanise one attitude-control equation of a satellite. The
output `dZ` is the change of the wanted control angle.

| integrator | y register | dx | dy | output |
|---|---|---|---|---|
| 1 | cos y | Δy (transducer) | Δcos y | Δsin y |
| 2 | −sin y | Δy | −Δsin y | Δcos y |
| 3 | K, never changes | Δθx (transducer) | none | Δ(K·Δθx) |
| 4 | cos Z | dZ | Δcos Z | Δsin Z |
| 5 | −sin Z | dZ | −Δsin Z | Δcos Z |
| 6 | sum | Δt | Δcos y + Δsin Z + Δ(K·Δθx) + dZ | dZ |

Integrators 1/2 and 4/5 are `dda_sincos` pairs. Integrator 3 multiplies by the
constant K. K is preset into a y register that only recirculates, and there is
no adder in front of it. Integrator 6 feeds its own output back into its y
register, which closes the loop that divides implicitly.

Integrator 6's y register takes four increment lines at once. At READ their
signs are summed to a net of −4, −2, 0, +2 or +4. That net is stored as a
two's-complement word. In the next iteration it is shifted, LSB first, through
integrator 6's y adder. An up/down counter could replace this summing step.
The net word is zero before the first READ. `load` presets all six y
registers and clears the remainders.

### Top (`fluid_di_top`)

One `timing_generator` drives six parts side by side:

* the experimental configuration: a `word_generator` sends a fixed integrand
  word (default `10101`) into a `time_integrator`, whose `dx`, open-loop controls
  and preset are ports;
* a complete `digital_integrator`, with `dx`, `dy` and presets as ports;
* a `dda_sincos` pair;
* a `dda_exp` network;
* a `dda_multiplier` network;
* a `dda_attitude` map.

Ports use the prefixes `exp_`, `di_`, `sc_`, `ex_`, `mul_` and `at_`. The timing pulses are also brought out.

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH` | 5 | word length in bits |
| `GAP` | 1 | clock periods between T5 and the next T1 |
| `Y_WORD` | `5'b10101` | the word generator's integrand |

## Interface rules

* Inputs `dx`, `dy`, `dtheta`, `open_loop` and `r_force` (and the `ex_`/`mul_` increments) must be steady from T1
  to T5. Change them in the gap (while `read` is high), or with the clock stopped.
* Give presets (`load*`) with the clock stopped or in the gap. A preset does not
  clear the carry or complementer state, but RESET does at the end of every iteration.
* Overflow outputs are valid only while `read` is high. The sign latches
  of the sine/cosine and exponential networks, and the multiplier's counter,
  act at the edge that ends READ. If the clock is stopped while `read` is
  high, that READ takes effect when the clock restarts. Stop in T1 (`t1`
  high) if a preset must not be followed by a READ.
* `rst_n` is an asynchronous active-low reset. It clears all registers and
  carries and puts the complementers in pass mode.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Expected values
come from word arithmetic, or from numbers published for this integrator, never
from the RTL:

* `tb_time_integrator` checks constant integrands 13, 5, 0, −5 and −16 (words
  `11101`, `10101`, `10000`, `01011`, `00000`). Each runs 1000 iterations from a
  cleared register. The positive and negative overflow counts match the
  published simulation table exactly at iterations 1–20, 160, 500 and 1000.
  The bench also checks the four open-loop sums and subtractions, a circulating
  stored number, and two three-iteration traces (R preset to `10001` with +dx,
  and to `01010` with −dx).
* `tb_fluid_di_top` runs the whole top at default parameters. It includes two
  170-iteration counter runs with dx present and absent, giving 111 `+dz`/59
  `−dz` and 59/111. That ratio of 1.88 lies inside the 1.80–2.00 band that
  hardware measurements of this design fell in. The bench counts that each
  mechanism happened at least once: both overflow signs, pass and complement,
  open loop, preset, clock stop, y up and down, and both signs of Δsin and Δcos.
  It also counts exponential feedback in both directions, growth of Z to +15,
  the multiplier counter stepping up and down, and the attitude map's y6
  moving up and down. The exponential and multiplier networks are compared
  with word models at every iteration. For the attitude map, the bench checks
  one dZ per iteration, that K is held, and y6 against the sum of its input lines.
* `tb_digital_integrator`, `tb_dda_sincos`, `tb_dda_exp`,
  `tb_dda_multiplier` and `tb_dda_attitude` compare every iteration with a
  word-level reference model. `tb_dda_exp` also checks growth and decay. `tb_dda_multiplier` also
  checks the 15 × 15 product. `tb_dda_attitude` also checks that K never
  changes and that y6 moves by every net amount from −4 to +4.
* The other testbenches cover the gates, the register stage, the timing pattern
  and rate, and the word generator.

Every testbench ends with one line, `TB_RESULT checks=N failures=M`. Each has a watchdog.

Only the default `WIDTH = 5` has been simulated. The RTL is parameterised by
`WIDTH`, but the testbenches' reference arithmetic assumes 5-bit words.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/di_pkg.sv rtl/*.sv tb/tb_fluid_di_top.sv \
          --top-module tb_fluid_di_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench and top-module name to run another bench. Each bench
finishes in well under a second. Verilator warns about some unused complement
outputs: the fluid elements always produce both polarities, and not every
polarity has a reader.

## Departures and choices

These points are this implementation's own, where the source design is silent
or is fluidic rather than clocked:

* **Clocking.** Fluid clock pulses become a clock-enable strobe `t` on a
  synchronous clock. The flip-flops are edge-triggered, not wall-attachment bistables.
* **Overflow stage.** The overflow stage is modelled as READ ANDed with the
  stored carry, giving `+dz`, or with its complement, giving `−dz`. Its
  fluid-circuit details are not available.
* **READ and RESET.** They are placed in the same single gap period. READ is
  evaluated before the edge at which RESET acts. In the original timing, READ
  comes first and RESET follows within the gap.
* **dx and the complementer.** `dx` acts by holding the complementer's state
  bit at "pass". How `dx` is wired into the original circuit is not documented.
* **Unit increment.** The y half receives its ±1 as the unit word `00001`
  through its complementer.
* **Presets.** Initial register contents are inserted by a parallel preset. The
  original inserted numbers by an unspecified means.
* **Sine/cosine and exponential latches.** Their reset sign ("+") is arbitrary.
* **Multiplier.** Only its formula is given. The two-integrator wiring
  follows from that formula. The summing counter and its 16-bit width are this
  implementation's choices.
* **Attitude map.** The connections come from its block diagram. The word
  length, K and the initial values are free choices; the testbench uses cos =
  +15, −sin = 0, K = +8 and y6 = 0. Of the two summing methods (counter, or
  adding in sequence through the adder), the adder is used, with all four
  increments added in one word.
* **Not implemented:** the fluid elements' analog behaviour, pneumatic
  supplies, the buffer amplifier, and the test instrumentation and counters.
