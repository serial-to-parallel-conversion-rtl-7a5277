# Serial to parallel conversion of signed pulse-rate signals

A pulse-rate signal carries a number as the frequency of a pulse train. Such
signals are cheap to add, subtract and integrate with a few gates and a
counter, and a binary rate multiplier (BRM) scales them by a binary fraction.
Classic BRM computers had no clean way to carry negative values. This design
uses a *two-pin* representation: one pin carries the sign (1 = negative,
0 = positive) and the other carries pulses at a rate proportional to the
magnitude. On top of that representation it builds a summer, a difference
element and an integrator. These are then closed into a feedback loop that
turns a steady signed pulse rate into a steady parallel word: the
*serial to parallel converter*. The word can drive a display or a D/A
converter.

The RTL follows the published description of this scheme: "Serial to Parallel
Conversion of Pulse-rate Signals using Binary Rate Multiplier Principle". Where
that description is silent, the choices made here are listed in
[Departures and own choices](#departures-and-own-choices).

## Signal conventions

Everything runs on one clock. A pulse is a single-cycle high level on a
magnitude pin. The sign pin is only meaningful in a cycle that carries a
pulse. At most one pulse per pin per clock is possible, so rates are bounded
by the clock frequency. In the converter, the clock *is* the BRM's
serializing frequency f_s. The reference configuration uses f_s = 12.5 MHz
(80 ns period).

`rate_pkg` holds the polarity encoding (`POL_POS` = 0, `POL_NEG` = 1) and a
helper that maps a (pulse, sign) sample to -1, 0 or +1.

## Binary rate multiplier (`serializing_counter`, `brm`)

An N-stage binary counter (N = 8 by default) advances on each input pulse.
On each input pulse exactly one stage goes 0 -> 1 without passing a carry:
stage i, whose lower stages are all 1. `serializing_counter` emits that
stage's non-carry pulse `nc[i]` in the same cycle. Stage 0 therefore fires
on every 2nd input pulse, stage 1 on every 4th, and stage i on one of every
2^(i+1). Two stages never fire together, and the 2^N-th pulse of a cycle
fires none.

`brm` ANDs each train with one bit of the rate register and ORs the
results. The fastest train (stage 0) is gated with the register's MSB, and
the slowest with its LSB. Over every 2^N input pulses the output therefore
carries exactly `rate` pulses:

    f_out = f_in * rate / 2^N          (rate = 0 .. 2^N - 1)

Example, 3 stages, register 110: 4 + 2 = 6 output pulses per 8 input pulses.
The output is combinational and coincides with the input pulse it is taken
from.

## Adding and subtracting signed rates (`summer`, `difference_element`)

The summer merges two two-pin streams into one. Per clock:

| inputs this cycle                     | output                                   |
|---------------------------------------|------------------------------------------|
| one pulse                             | passed, with its own sign                |
| two pulses, opposite signs            | none (they cancel); sign pin 0           |
| two pulses, same sign                 | one now, plus an extra one next cycle    |

The awkward case is the last one: one output pin can carry only one pulse per
clock, so the second pulse is inserted in the following cycle. Here the
pending pulse sits in a small signed backlog (`PEND_W` = 2, up to 3 pulses).
Each cycle the backlog and the two inputs are added. A nonzero sum produces
one pulse with the sum's sign, and the rest stays in the backlog. With an
empty backlog this is exactly the table above. When an inserted pulse meets
new input pulses, the signed pulse count is still exact: a pending pulse and
a new pulse of the other sign cancel, and a new pulse of the same sign waits
one more cycle. If the backlog would overflow, a pulse is lost and `ovf`
pulses. Overflow needs sustained input rates close to two pulses per clock,
which the converter never produces in normal use.

`difference_element` is a summer whose B polarity is inverted, so it
computes A - B:

* coincident pulses of the same sign cancel;
* coincident pulses of opposite sign give two pulses (now and next cycle),
  both with A's sign;
* a lone B pulse is passed with its sign complemented.

## The integrator (`updown_counter`, `integrator`)

A pulse-rate integrator is a counter. Signed inputs need a sign-magnitude
counter: a magnitude register (`updown_counter`, a fully synchronous up/down
counter) plus a separate polarity flag. A pulse whose sign equals the
current polarity counts up. A pulse of the other sign counts down. At
magnitude 0, any pulse counts up to 1 and the flag takes the pulse's sign.
The integral thus crosses zero by changing sign instead of wrapping. At
2^WIDTH - 1, a further count-up is ignored (saturation).

`reset` (synchronous) loads a preset magnitude `rst_cnt` and polarity
`pol_rst`. `enable` low freezes the count. The standalone default width is
8 bits.

## The integrating rate element (`rate_integrator`)

`rate_integrator` puts a BRM behind the integrator. The BRM has as many
stages as the integrator has bits (10 by default) and is fed by `fs_pulse`.
It turns the count m back into a rate that carries the integrator's sign:

    f_o = f_s * m / 2^WIDTH

## The converter loop (`sp_converter`, top level)

```
 pulse_in,pol_in ──► (+) difference ──► rate_integrator ──► par_out, par_sign
                     (−) element         (count m, BRM)        (parallel word)
                      ▲                         │
                      └──── fb_pulse, fb_pol ◄──┘   f_o = f_clk * m / 1024
```

The integrator counts the difference between the input rate and its own BRM
output rate. It stops moving, on average, when the two are equal:

    m_steady = 2^INT_W * f_in / f_clk = 1024 * f_in / f_clk

The polarity flag follows the input sign. So a steady input rate becomes a
steady parallel word, and the word is the input rate scaled to the clock.

**Dynamics.** Per clock, m gains one for each input pulse and loses m/1024 on
average through the feedback. In z-domain terms the loop is an accumulator
1/(z-1) with feedback gain k = 1/1024. The closed loop 1/(z - 1023/1024) is a
first-order low pass with time constant

    tau = T / (1 - 1023/1024) ≈ 1024 clocks ≈ 82 µs at 12.5 MHz.

The converter therefore needs the input rate to be steady, or to change only
slowly, compared with tau. A larger `INT_W` gives finer resolution but a
proportionally slower response.

**Steady-state ripple.** The loop is an integer system. The feedback rate at
a given m follows the BRM's fixed pulse pattern, and the input is a pulse
train, not a continuous rate. So the count dithers by a few LSBs, and its
mean can settle slightly off the ideal value. This is most visible at very
low rates. Measured means at 12.5 MHz (periodic input trains, 16384-clock
average after settling):

| input (kpulses/s) | ideal 1024·f_in/f_s | mean `par_out` (+) | mean `par_out` (−) |
|------------------:|--------------------:|-------------------:|-------------------:|
|   24.4            |   2                 |   1.68             |  −1.73             |
|   48.8            |   4                 |   3.87             |  −3.97             |
|   97.7            |   8                 |   6.80             |  −8.44             |
|  195.3            |  16                 |  16.00             | −16.38             |
|  390.6            |  32                 |  31.53             | −32.25             |
|  781.25           |  64                 |  63.62             | −64.00             |
| 1562.5            | 128                 | 127.88             | −128.50            |
| 3125              | 256                 | 255.00             | −255.00            |

For a step from 0 to 1562.5 kpulses/s, the output reached 63.2 % of its final
value after 1010 clocks (80.8 µs).

Ports of `sp_converter`:

| port                 | dir | width | meaning                                               |
|----------------------|-----|-------|-------------------------------------------------------|
| `clk`                | in  | 1     | clock = serializing frequency f_s                     |
| `reset`              | in  | 1     | synchronous; loads the preset, clears the counters    |
| `enable`             | in  | 1     | integrator enable                                     |
| `pulse_in`, `pol_in` | in  | 1, 1  | input rate (magnitude pin, sign pin)                  |
| `rst_cnt`, `pol_rst` | in  | INT_W, 1 | preset value and polarity                          |
| `par_out`, `par_sign`| out | INT_W, 1 | parallel output: magnitude and sign                |
| `fb_pulse`, `fb_pol` | out | 1, 1  | the converter's output rate (the fed-back signal)     |
| `diff_ovf`           | out | 1     | difference element backlog overflow                   |

Parameters: `INT_W` = 10 (integrator and BRM width), `PEND_W` = 2 (summer
backlog).

## Departures and own choices

* **Output width.** The converter's figure labels the parallel output
  "8-bit". The analysis of the same converter uses a 10-bit integrator with
  k = 1/1024. The RTL follows the 10-bit analysis and brings out all 10
  bits. The standalone `integrator` keeps the 8-bit default of its own
  description.
* **Steady values.** The original simulation reports steady words somewhat
  below the ideal 1024·f_in/f_s: 14 for 195.3k, 60 for 781.25k, 116–118 for
  1562.5k and 217 for 3125k. This RTL settles close to the ideal (table
  above). The source does not say what caused the shortfall there.
* **Polarity encoding.** One passage calls a positive stream "high" and a
  negative one "low". Everywhere else, including the integrator's pin
  description, 1 means negative. The RTL uses 1 = negative.
* **Own choices where the description is silent:** one global clock with
  single-cycle pulses; fully synchronous counters and synchronous resets;
  the summer's netting backlog and its overflow flag; the integrator's
  zero-crossing rule and saturation at full scale; the order in which the
  serializing counter's stages fire within a cycle; and the parallel load of
  the up/down counter.
* **Not built:** the preset value was loaded over an RS-232 link, whose
  protocol is not given. `rst_cnt`/`pol_rst` are top-level ports instead.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rate_pkg.sv tb/tb_sp_converter.sv --top-module tb_sp_converter -o sim
./obj_dir/sim
```

`tb_sp_converter` runs the converter at its default size, in well under a
second. It applies eight input rates of both signs, the step response and
time-constant check, a sign reversal through zero, presets, an enable
freeze, and saturation with a pulse on every clock. It counts each of these
events, plus difference-element cancellations and inserted pulses, and fails
if any of them never occurs.

Other testbenches:

* `tb_brm`: pulse counts over full BRM cycles.
* `tb_serializing_counter`: stage firing pattern.
* `tb_summer`, `tb_difference_element`: each rule, then pulse-count
  conservation on random streams.
* `tb_updown_counter`: the 1111 -> 0000 down-count, then a random model
  comparison.
* `tb_integrator`: a clamped signed-integer model.
* `tb_rate_integrator`: m pulses per 1024 clocks.

To change the resolution, set `INT_W`. Both the steady word and the time
constant scale with 2^INT_W.
