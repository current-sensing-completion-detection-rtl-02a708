# Completion-sensing ripple carry adder and Booth multiplier

A ripple carry adder is small and frugal, but a clocked design has to give every
addition the time of the longest possible carry chain: 32 stages for a 32-bit
adder. Random operands rarely excite chains longer than six or seven bits, so
most of that time is wasted. This design lets the adder itself say when its
carries have stopped moving. Whatever schedules the adder can then start the
next addition after the actual delay instead of the worst-case one.

Completion is detected by watching current. A CMOS inverter draws supply current
only while its input is between the rails. So every carry node of the adder
also drives one minimum-size *sense inverter*. The ground rails of these
inverters are joined and go to one latch-type *current sensor*. The sensor
watches only the sense inverters, never the adder's own supply. The functional
path therefore sees only the small fan-out of one minimum-size gate per carry
node, and the sensor only has to handle the current of at most 32 small
inverters.

The repository holds:

* `cscd_adder`: the 32-bit adder with its sensing circuitry. A clock delay
  generator, a control signal generator, the sense inverters and the current
  sensor produce a `done` flag.
* `cscd_booth_multiplier`: a signed 32 × 32 → 64-bit radix-4 Booth multiplier
  built around that adder. This is the top level. It moves to the next Booth
  step as soon as the adder reports completion, or at once when the step needs
  no addition.

## What is real logic and what is a model

The digital parts are synthesizable SystemVerilog: the full adders, the ripple
carry adder, the phase decoder, and the whole multiplier datapath and control.
Three parts are analog in silicon. They exist here as behavioural models for
simulation only:

| module | silicon | model |
|---|---|---|
| `clock_delay_generator` | tuned delay line (CDG) | `assign #400ps dclk = clk` |
| `sense_inverter_array` | 32 minimum-size inverters | sense current = number of carry nodes that changed within the last 100 ps |
| `current_sensor` | cross-coupled latch comparing sense and reference current | flags any sense current above `IREF` during the accumulation window |

The full adders carry an inertial delay of 153 ps on each output. That is the
worst-case 32-stage delay of 4.9 ns divided by 32. Inside the sensed adder the
delay is 159 ps, which adds 0.2 ns over the whole chain for the sense-inverter
load. These delays make the carries ripple in simulation, so the sensor has
something to see. Synthesis ignores all delays. After synthesis, therefore,
`dclk` equals `clk`, and the sensor and sense-inverter models are empty. A
silicon implementation replaces those three modules with the custom circuits.

Simulation needs `--timing`, because the models use delays.

## How completion is sensed

### Three phases per clock

The control signal generator decodes the clock `clk` and its 0.4 ns-delayed copy
`dclk` into three phases. Exactly one phase is active at any time:

```
clk     ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________/‾‾‾‾‾‾‾‾
dclk    __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\________________/‾‾‾‾‾
          |  precharge  |     accumulate    |eval|
            clk & dclk          ~clk       clk & ~dclk
```

* **precharge**: the two latch inputs are shorted together.
* **accumulate**: the sense current and a reference current charge one latch
  input each.
* **evaluate**: the latch is powered and resolves.

This model updates `done` at the start of evaluation and holds it until the next
evaluation. `done` is high if no carry node switched during the accumulation
window just ended.

### When a result may be used

The registers around the adder load on the **rising edge of `dclk`**, which is
the end of the evaluation phase. An addition therefore runs like this:

1. New operands appear at a `dclk` edge. The carries start to ripple during the
   precharge phase.
2. The following accumulation window (`clk` low) decides the flag. If a carry is
   still switching in that window, `done` goes low at the next evaluation. If
   nothing switches, `done` goes high.
3. At the next `dclk` edge the consumer samples `done`. If it is high, the sum
   has settled and is used. If it is low, the consumer waits one more clock and
   samples again.

Say the clock period is P and the delay generator delay is D = 0.4 ns. An
addition completes in one clock if its carries settle within about P/2 − D,
minus the 100 ps switching window. It completes in k clocks if they settle
within (k − ½)·P − D.

**Why the flag is safe.** While a carry chain is rippling, some carry node
changes at least once every stage delay (159 ps). Each change counts as current
for 100 ps. The clock period must exceed 2·D = 0.8 ns, or the phases do not
exist. At any such period the accumulation window (P/2, at least 0.4 ns) is more
than twice a stage delay. So a chain that is still moving cannot pass through
the window unseen. The sensor trips when more than `IREF` inverters conduct, and
`IREF` is 0 by default. Raising it trades safety for speed: the adder
testbench's broken variant, with `IREF` = 2, reports completion too early about
once in a thousand additions.

The unsensed adder has a worst-case period of 4.9 ns. The padded period for the
sensed design is 4.9 + 0.2 + 0.4 = 5.5 ns. The adder is meant to be run at a
fraction of that period (5.5 ns / 2, / 3 or / 4). It then takes a whole number
of clocks, matched to each addition's own carry chain.

## The Booth multiplier

```
multiplicand ─► load_register ─► booth_multiple_select (CB2) ─┐ operand, cin
                                                               ▼
           ┌────────── partial product (acc) ─────────► cscd_adder ──► done
           │                                               │ sum
           │                              skip_select (CB3) ◄┘ (acc if digit = 0)
           │                                               ▼
           └──────────────── product_shift_register ◄──────┘   >>> 2 per step
                                   │ {y[2i+1], y[2i], y[2i-1]}
                              booth_decoder ─► digit, skip
step_counter (4 bit) ◄── step ── booth_step_control ◄── start, done, skip
```

* **Radix-4 recoding.** `booth_decoder` maps each multiplier bit triple to a
  digit in {−2, −1, 0, +1, +2}. There are N/2 = 16 steps, which is why the step
  counter is 4 bits.
* **CB2, the multiple selector.** It forms 0, M or 2M and sign-extends it. For a
  negative digit it inverts the value and sets the adder's carry-in, so the
  adder adds the two's complement.
* **CB3, the skip selector.** For a zero digit it passes the partial product
  unchanged. Runs of 0s or of 1s in the multiplier need no addition.
* **Step control.** Each `dclk` edge while running does one of three things.
  It takes a step at once if the digit is zero (`skip`). It takes a step if the
  adder's `done` is high. Otherwise it stalls for a clock (`stall`). After the
  16th step `done` (multiplication complete) rises and stays high until the
  next `start`.
* **Product register.** It holds `{acc, q, y[-1]}`. Start loads
  `{0, multiplier, 0}`. Each step loads CB3's output into `acc` and shifts the
  whole register right by two, arithmetically. The product is
  `{acc[31:0], q}`.

**Widths.** The adder, CB2 and the partial product are N + 2 = 34 bits wide, not
32. Exact signed radix-4 Booth needs ±2M and a partial product that can reach
about 1.33 · 2^N. The register therefore holds 64 product bits plus two guard
bits and the Booth bit.

**Interface.** Present `multiplicand` and `multiplier` and raise `start` for one
`dclk` edge while `busy` is low. The operands are loaded at that edge, and `busy`
rises. When `done` rises, `product` is valid. A multiplication takes 16 clocks
plus one clock per stall. `rst_n` is an asynchronous, active-low reset. The
outputs `dclk`, `addcomp`, `skip` and `stall` are there to observe the handshake.

## Measured behaviour

These figures come from the testbenches, using this design's delay and sensor
model. They are not silicon measurements.

**Adder.** `tb_cscd_adder` runs 100 000 random 32-bit additions at each clock.
The baseline is 4.9 ns per addition.

| clock | clocks per addition | time saved |
|---|---|---|
| 2.75 ns (5.5/2) | 1.24 | 30.5 % |
| 1.83 ns (5.5/3) | 1.95 | 27.0 % |
| 1.375 ns (5.5/4) | 2.01 | 43.5 % |

**Multiplier.** `tb_cscd_booth_multiplier` runs 1000 random multiplications at
each clock. The baseline is 16 steps at 4.9 ns each, with no skipping.

| clock | time saved |
|---|---|
| 5.5 ns | −12.3 % |
| 2.75 ns | 32.0 % |
| 1.83 ns | 37.2 % |
| 1.375 ns | 51.4 % |

At the full padded period of 5.5 ns almost every addition completes in its
first clock. Every step then costs one 5.5 ns clock, which is slower than the
baseline. The gain appears only when the clock is a fraction of the worst-case
period.

Two kinds of step make up these results. About a quarter of the Booth digits
are zero, and those steps take one clock without waiting. The other additions
often excite long carry chains, because adding a negative multiple to a
positive partial product ripples through the sign-extension bits.

**Carry chains.** `tb_carry_propagation` starts every addition from 0 + 0. It
measures when the carries of 100 000 random 32-bit additions settle, and checks
each time against the longest generate-and-propagate chain of the operands. The
mean longest chain is 4.3 stages. The longest seen was 19 stages, and 95 % were
at most 7 stages.

## Departures and choices

* **Adder width.** The multiplier's adder is 34 bits wide (32 + 2 guard bits),
  for exact signed results.
* **Active edge.** The datapath registers are clocked by the delayed clock, so
  that a completion flag resolved at the start of evaluation is used in the same
  period.
* **Phase boundaries.** Precharge, accumulation and evaluation are decoded from
  `clk` and `dclk` as shown above. That decoding is a reading of the phase
  diagram, not a given equation.
* **Sensor model.** The current sensor is modelled as a threshold detector.
  The sense inverter's conduction window is 100 ps and the threshold `IREF` is
  0. These are model parameters and can be changed.
* **CB2 and CB3.** These two blocks are only named in the source diagram. Here
  CB2 is the Booth multiple selector and CB3 the skip bypass. The second CB2
  instance is the plain feedback path from the product register to the adder.
* **Design-specific additions.** Reset, the state encoding, ignoring `start`
  while busy, and the observation ports are choices of this design.

## Files

* `rtl/cscd_pkg.sv`: delays, widths and the Booth digit type.
* `rtl/full_adder.sv`, `rtl/ripple_carry_adder.sv`: the adder.
* `rtl/clock_delay_generator.sv`, `rtl/control_signal_generator.sv`,
  `rtl/sense_inverter_array.sv`, `rtl/current_sensor.sv`: the sensing
  circuitry.
* `rtl/cscd_adder.sv`: the sensed adder.
* `rtl/booth_decoder.sv`, `rtl/booth_multiple_select.sv`,
  `rtl/skip_select.sv`, `rtl/load_register.sv`,
  `rtl/product_shift_register.sv`, `rtl/step_counter.sv`,
  `rtl/booth_step_control.sv`: the multiplier blocks.
* `rtl/cscd_booth_multiplier.sv`: the top level.
* `tb/tb_<module>.sv`: a self-checking testbench for each module.
* `tb/tb_carry_propagation.sv`: the carry-chain length experiment on the
  ripple carry adder.

## Simulating

Every file declares `timeunit 1ps`. The models need `--timing`:

```
verilator --binary --timing --assert -Irtl rtl/cscd_pkg.sv \
    tb/tb_cscd_booth_multiplier.sv --top tb_cscd_booth_multiplier -Mdir obj
./obj/Vtb_cscd_booth_multiplier
```

Replace the testbench name to run any other test. Each test ends with the line
`TB_RESULT checks=<n> failures=<m>`.

The end-to-end test runs at the default size. It checks every product against
the testbench's own multiplication. It checks that each multiplication took 16
clocks plus its stalls. It also checks that skipped steps, first-clock
additions, stalls and completed multiplications all occurred. It takes a few
seconds.

To try other timing, change the constants in `cscd_pkg`: the stage delay, the
delay generator delay, the switching window and the sensor threshold. Or pass
them as parameters of `cscd_adder`.
