# FPGA logic for a PMSM drive board: ADC-driven dead-band PWM and a Hall-sensor speed observer

A permanent-magnet synchronous motor (PMSM) drive for a hybrid vehicle needs
two things from its FPGA.

* Gate signals: PWM signals in complementary pairs, with a dead time so that
  the two switches of a half bridge are never on together.
* The rotor's speed and angle, read from three cheap Hall sensors.

This repository holds synthesizable SystemVerilog for both. It is the logic
of a laboratory control board that runs from a 24 MHz clock.

**The PWM chain** reads a 12-bit AD7276 ADC once per PWM period. Each reading
becomes the duty compare value of the next period. Three carrier shapes are
built: up-counting, down-counting and up/down (center-aligned). Each one
drives a dead-band stage with programmable rising- and falling-edge delays.

**The speed observer** sees only the six Hall sectors of each electrical turn.
It does two things with them:

* It measures the time between sensor edges to get the speed.
* It integrates sin/cos of the angle between edges, so the angle is smooth
  and not just stepped in units of 60°.

## Block map

```
            pll_locked ──► start_pulse ──┐ start
                                         ▼
   adc_sdata ──► adc_ad7276_reader ◄── OR ◄── period done of the selected PWM
                    │ value, done                         ▲
                    ▼                                     │
     duty = value (or TEST_DUTY) ──► pwm_up   ─┐          │
     load strobe = ADC done      ──► pwm_dn   ─┼─ mux (pwm_mode) ──► gate_q[4:0], gate_q_n[4:0], pwm_done
                                 ──► pwm_updn ─┘
                                  (each contains a dead_band)

   hall[2:0] ──► speed_observer ──► so_sin, so_cos, so_wr, so_freq, so_trans
                      ▲   start = start_pulse OR its own done │
                      └────────────────────────────────────────┘ so_done
```

| file | what it is |
|---|---|
| `rtl/pmsm_pkg.sv` | Shared types: the Q2.24 angle type, the sin/cos pair, the Hall tables (sector bounds, edge values, initial values) as functions |
| `rtl/pmsm_fpga_top.sv` | Top level; wires the chain above |
| `rtl/start_pulse.sv` | One pulse, `width` clocks long, after the PLL reports lock |
| `rtl/adc_ad7276_reader.sv` | Serial reader for the AD7276 (CS, SCLK, SDATA) |
| `rtl/pwm_up.sv`, `rtl/pwm_dn.sv`, `rtl/pwm_updn.sv` | The three carriers and compare |
| `rtl/dead_band.sv` | Edge counters and the delayed and complementary outputs |
| `rtl/speed_observer.sv` | Hall-sensor speed and angle observer |

The PLL is outside this RTL. The top takes its clock output as `clk` and its
LOCKED flag as `pll_locked`. While `pll_locked` is low, every block is held in
reset, just as when `rst_n` is low. Reset is asynchronous and active low
throughout.

## The closed ADC → PWM loop

After lock, `start_pulse` fires once. Its pulse passes an OR gate into the ADC
reader's `start` input. The other input of the OR gate is the `done` of
whichever PWM generator `pwm_mode` selects:

| `pwm_mode` | generator |
|---|---|
| 0 | up |
| 1 | down |
| 2 or 3 | up/down |

When the reader finishes a frame, its `done` strobes the `start` input of all
three generators. They latch the new duty D together with RED and FED. From
then on the loop runs by itself: one ADC frame per PWM period, and each frame
sets the duty of the period after it.

`duty_from_const` replaces the ADC word with the parameter `TEST_DUTY`. This
gives a known duty for bench tests.

The ADC frame takes `2*16*(CLK_DIV+1) + 2` clocks, which is 66 at the default
`CLK_DIV = 1` (SCLK = 6 MHz). That is far shorter than a PWM period, so the
new duty is always in place well before the carrier needs it.

## PWM carriers

All three generators share the same scheme:

* An N-bit counter (N = 12 by default) runs freely from reset.
* The compare `count >= D` is registered to give the raw PWM, `Q`.
* `done` marks the period boundary.

| generator | period (clocks) | high time of Q (clocks) | `done` |
|---|---|---|---|
| `pwm_up` | 2^N = 4096 (5.86 kHz) | 2^N − D | one clock after the wrap 2^N−1 → 0 |
| `pwm_dn` | 2^N = 4096 | 2^N − D | one clock after the wrap 0 → 2^N−1 |
| `pwm_updn` | 2·(2^N−1)·(div+1) = 8190 (2.93 kHz) | (2·(2^N−1−D)+1)·(div+1) | set at the bottom turn, cleared on the next counter step |

Because Q is high while `count >= D`, a larger D gives a *shorter* high time.
D = 0 keeps Q high for the whole period.

`pwm_updn` also has a clock divider input, `clk_div`. Its counter steps once
every `clk_div+1` clocks. The top ties it to the parameter `PWM_CLK_DIV`
(default 0).

## Dead band: the timing that matters

`dead_band` (used inside each generator) watches the raw PWM Q:

* A rising edge of Q clears and starts the 4-bit rising-edge counter.
* A falling edge of Q clears and starts the falling-edge counter.

Each counter counts up to its reference, RED or FED, and stops. The outputs
are then simple compares on the two counters, all registered:

```
Q1 = (count >= D) | (fed_count <= FED)     Q stretched at its falling edge
Q2 = red_count >= RED                      Q with a delayed rising edge
Q3 = Q1 & Q2 (one clock later)
Q4 = fed_count >= FED                      complement of Q, delayed rising edge
done_red = rising-edge counter idle,  done_fed = falling-edge counter idle
```

`gate_q = {Q4,Q3,Q2,Q1,Q}`, and `gate_q_n` is its complement.

Let t be the clock on which Q changes. For pulses and gaps longer than the
delays, the outputs are exact:

| output | rises | falls |
|---|---|---|
| Q2 | t + RED + 2 after Q rises | t + 2 after Q falls |
| Q4 | t + FED + 2 after Q falls | t + 2 after Q rises |
| Q1 | with Q | t + FED + 4 after Q falls |

| flag | goes low | for |
|---|---|---|
| `done_red` | 2 clocks after Q rises | RED+1 clocks |
| `done_fed` | 2 clocks after Q falls | FED+1 clocks |

Q2 and Q4 form the complementary gate pair. Between Q4 falling and Q2 rising
there are exactly RED clocks with both off. Between Q2 falling and Q4 rising
there are FED clocks. The default RED = FED = 4 gives 167 ns at 24 MHz. The
target for the buck converter the board was tested on was about 180 ns.

Limits: RED may be 0..15, but FED only 0..14. The falling-edge counter steps
once more after reaching FED, so at FED = 15 it wraps to 0 and Q1 stays high.

## AD7276 reader

A frame is 16 SCLK cycles with CS low. They carry two leading zeros, D11..D0
MSB first, and two trailing zeros. This frame format comes from the
converter's data sheet.

* SCLK idles high. Each half period lasts `clk_div+1` clocks.
* SDATA is sampled on the clock that drives SCLK low.
* Only bits 2..13 are shifted into the 12-bit register.
* After the 16th cycle CS rises, `value` is updated and `done` pulses for
  one clock.
* A `start` during a frame is ignored.
* An assertion checks that SCLK is high whenever CS is high.

## Hall-sensor speed and position observer

Three Hall sensors 120° apart give a 3-bit code that changes every 60° of
electrical angle. The valid codes, in forward order, and their sector centres:

| code {ha,hb,hc} | 100 | 110 | 010 | 011 | 001 | 101 |
|---|---|---|---|---|---|---|
| sector centre | 0 | π/3 | 2π/3 | π | 4π/3 | 5π/3 |

The edges lie at π/6 + k·π/3.

**Before start.** `sin_rh`/`cos_rh` hold the centre of the sector the sensors
report, and the speed is 0. `start` (a pulse) switches the block to tracking.
The top feeds it the start pulse OR-ed with the observer's own `done`.

**At every Hall edge:**

* `trans` = {Ta, Tb, Tc} shows which sensor changed, for one clock.
* The angle estimate is reset to the exact sin/cos of that edge. The value
  depends on which sensor changed and on the other two (see
  `hall_transition` in the package).
* The clocks since the previous edge, n, give the speed
  w = (π/3)·f_clk / n rad/s, with a combinational divide.
* `done` pulses when w is updated.

The first edge after start only arms the measurement, because the time before
it is not a whole sector. So `done` pulses once per edge from the second edge
on.

**Between edges**, every clock takes one forward-Euler step of
d/dt [cos, sin] = w·[−sin, cos]:

```
sin += (w·Ts)·cos      cos −= (w·Ts)·sin      Ts = 1/f_clk
```

The result is clamped to the current sector's range of sin and cos. So when
the rotor slows, the estimate waits at the sector edge rather than running
ahead into the next sector. An invalid code (000 or 111) freezes the estimate.

**Output.** The rotor angle is the Hall angle plus the sensor mounting offset
φ = 26°. sin/cos of it come from the angle-sum identities, with cos φ and
sin φ as parameters in Q.24.

**Number formats.**

| quantity | format |
|---|---|
| internal angle | Q2.24 (26 bits, so +1.0 fits) |
| internal speed | 11 integer + `WR_F` fraction bits (default 24) |
| w·Ts | formed once per clock with 48 fraction bits |
| π/3 | held to 30 fraction bits |
| `so_wr` (rad/s), `so_freq` (Hz) | 12 bits with 2 fraction bits, saturating at 511.75 |
| `so_sin`, `so_cos` | signed Q1.11, saturating |

The speed outputs keep a signed format but are never negative, so their top
bit is always 0.

**Timing.** Hall inputs are registered once. An edge is acted on one clock
later. The new speed is used from the clock after that. The outputs are
registered one more time.

**Worked example.** Hall signals of 59.86 Hz give 66825 clocks per sector.
The observer computes w = 376.098 rad/s, and `so_wr` reads 1504, which is
376.0 rad/s. `so_freq` reads 239, which is 59.75 Hz.

**Range.**

* The 24-bit interval counter saturates at 0.70 s per sector (about 0.25 Hz
  electrical). Slower rotation reads as that speed.
* The 12-bit speed output clips above 511.75 rad/s. The internal speed holds
  up to 2047 rad/s.

## Where this design departs from its source description

* **Integration formulas.** The source's discrete update equations are
  inconsistent with its own differential equation. The equation and the
  reference program agree with each other, and those are followed:
  sin' = w·cos, cos' = −w·sin.
* **Dead-band register.** In the reference up- and down-counter programs, the
  register holding the previous Q is never assigned, which would leave the
  dead band dead. It is registered here as in the up/down program.
* **RED/FED width.** One description gives RED as 3 bits; the programs use 4.
  4 bits are used.
* **One top, three generators.** The original ran the three carriers as
  separate builds. Here all three run side by side and `pwm_mode` picks one.
* **Speed arithmetic.** π/3 is held to 30 bits (the original program rounded
  it to 1.046875). Ts is exact to 48 bits.
* **Interval counter.** It saturates rather than wraps.
* **Invalid Hall codes** freeze the estimate instead of forcing sin = cos = 0.
* **Own choices where the source is silent:**
  - the ADC frame format and SCLK rate (`CLK_DIV = 1`)
  - the start pulse's width (4 clocks) and its one-clock delay after lock
  - the reset values
  - the observer's interval counter width (24 bits)

## Verification

Each block has a self-checking testbench in `tb/`. Each one computes the
expected values itself and prints `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_dead_band` | random Q patterns at eight RED/FED settings, every output every clock (via `db_checker`) |
| `tb_pwm_up`, `tb_pwm_dn` | period, high time 2^N − D, position of the Q edge after `done`, dead band, at N = 12 |
| `tb_pwm_updn` | the same for the center-aligned carrier, at dividers 0, 1 and 3 |
| `tb_adc_ad7276_reader` | value, latency, 16 SCLK falls, SCLK half period, CS at `done`, ignored extra starts (against `ad7276_model`) |
| `tb_start_pulse` | every width 0..7, random lock delays, no repeat pulse |
| `tb_speed_observer` | initial values, edge values, speed within one LSB, the angle between edges against ideal rotation, the 26° rotation, saturation, sector clamping, the invalid code |
| `tb_speed_observer_m` | the observer at m = `WR_F` = 4, 8, …, 32: speed error within 2^−m and not growing with m (0.035 rad/s at m = 4, below 1e−6 from m = 16) |
| `tb_pmsm_fpga_top` | the whole design at its default parameters (see below) |

`tb_pmsm_fpga_top` uses an ADC model and an ideal Hall generator. It checks,
period by period, in every mode and with the constant duty:

* one ADC frame per period
* the high time set by the ADC value
* the period length
* the dead-band outputs

It also checks:

* the 376 rad/s reading at 59.86 Hz
* saturation at 1005 rad/s
* sector clamping when the rotor slows down

It counts every mechanism and fails if one never happened.

Helpers in `tb/`:

* `ad7276_model.sv`: a behavioural model of the converter's serial interface
* `db_checker.sv`: the dead-band reference checker

To simulate with Verilator 5, run from the repository root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Mdir obj -o sim \
  --top-module tb_pmsm_fpga_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pmsm_pkg.sv tb/tb_pmsm_fpga_top.sv
obj/sim +verilator+rand+reset+2
```

Replace the top-module name and the file to run any other testbench. All
testbenches finish in seconds.

## What is not here

The rest of the board is analog or off-the-shelf parts:

* signal conditioning and Sallen-Key filters
* level shifters
* the ADC chips themselves
* a second, 8-channel ADC with no described interface
* the CAN isolator and transceiver
* differential inputs
* the DSP
* power supplies
* digital I/O

None of these has logic in this RTL. The constants block of the original
schematic became top-level parameters. A DAC used to watch the speed on a
scope is not described well enough to build.
