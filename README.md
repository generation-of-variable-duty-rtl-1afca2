# Variable duty cycle PWM generator

This is a small PWM generator. The PWM frequency is fixed. The duty cycle is set
by an N-bit word (N = 4 by default). The method is fully digital: count, compare,
latch. A free-running N-bit counter divides the clock into periods of 2^N clocks.
The counter's overflow starts each period by setting a set/reset latch. An
equality comparator ends the high part by resetting the latch when the count
reaches the duty word. The latch output is the PWM signal. Its frequency is
f_clk / 2^N whatever the duty word. The duty word sits in a register that is
reloaded only at the overflow, so a new value takes effect at the next period
boundary and no period is cut short.

A small control unit supplies the duty word. It steps the word by one every
period, so the output sweeps through the whole duty range, one period per
value, over and over. Swap the control unit for another source to drive the
generator from elsewhere. The datapath takes any N-bit word on `dutyin`.

```
              +--------------+  dataout   +-------------------------------------------+
   clk ------>| control_unit |----------->| pwm_datapath                              |
         +--->|  (+1 / load) |   dutyin   |   duty_register --> duty_comparator --r-+ |
         |    +--------------+            |        ^ load          ^ count          | |
         |                                |        |               |                v |
         |                                |   pwm_counter --load----+-----s----> sr_latch --> pwm
         +---------------- load ----------|   (free running)                          |
                                          +-------------------------------------------+
```

## One period, clock by clock

Most of the behaviour is in how the counter, the register and the latch line up
in time. Take a held duty word D and N = 4:

| clock of the period | count | `load` (overflow) | comparator | latch / `pwm` |
|---|---|---|---|---|
| 0 | 15 | 1 | (compares the old word) | **set**, 1 |
| 1 | 0 | 0 | 0 unless D = 0 | 1 |
| ... | ... | 0 | 0 | 1 |
| D | D-1 | 0 | 0 | 1 |
| D+1 | D | 0 | **1** | **reset**, 0 |
| ... | ... | 0 | 0 | 0 |
| 15 | 14 | 0 | 0 | 0 |

* `load` is a decode of the all-ones count, so it is high during the last count
  of the counter's cycle. This design treats that clock as the first clock of a
  PWM period, because that is where the output goes high.
* The register takes the new duty word at the rising edge that ends the
  overflow clock. The comparator sees the new D from count 0 on.
* The output is therefore high for **D + 1 of the 2^N clocks**: duty = (D+1)/2^N.
  For N = 4 that is 6.25 % to 100 % in steps of 6.25 %. D = 15 gives a constant
  high output: in that case the comparator and the overflow fire in the same
  clock, and set wins over reset.
* A 0 % output is not reachable. With 2^N words there are 2^N levels. Reaching
  both 0 % and 100 % would take 2^N + 1 levels.
* The simple duty formula D / 2^N is off by one clock. The extra clock is the
  overflow clock that sets the latch.

The control unit advances on the same edge at which the register loads. So
the register captures the value the control unit held *before* the step. From
power-up the periods carry D = 0, 1, 2, ..., 15, 0, ...

## The latch

`sr_latch` is a level-sensitive latch, not a flip-flop. It has only `s`, `r`
and the output, and no clock. It is set by the counter overflow and reset by
the comparator. Both inputs come from flip-flops through decodes, so in
simulation the output changes just after the rising clock edge, as shown in
the table above. Synthesis reports one latch bit, on purpose.

In silicon, decodes of a counter can glitch while several bits change at once.
A glitch on `r` could end a pulse early, and a glitch on `s` could start one.
If that matters for your target, register `s` and `r` (or turn the latch into
a clocked set/reset flip-flop with the same priority). The period and duty
arithmetic above stays the same, with the output one clock later.

Which input sets the latch matters. In this design the overflow sets it and
the comparator resets it. The opposite wiring gives an output whose high time
is 2^N - 1 - D clocks. That inverts the meaning of the duty word, and the
all-ones word then becomes a corner case.

## Power-up without a reset

The generator has two pins, `clk` and `pwm`, and no reset. Every storage
element gets a power-up value of zero from its declaration initialiser. An FPGA
loads that value at configuration, and Verilator honours it. The
design does not depend on it, though:

* the counter is free running, so every state is valid;
* the register is overwritten at the first overflow;
* the latch is set at the first overflow;
* the control unit's start value only shifts the sweep.

From any start state the output is correct from the first overflow on. At most
2^N - 1 clocks come before it. With the zero start, the output stays low for
the first 15 clocks (count 0 to 14, D = 0). It then begins the period pattern
at clock 15.

For an ASIC, or wherever initial values are not honoured, add a synchronous
reset to `pwm_counter`, `duty_register` and `control_unit`. Verilator's lint
flags each initialised variable that a process also writes (PROCASSINIT). That
warning is expected here.

## Modules

All sizes come from `N`, which defaults to `pwm_pkg::PWM_BITS = 4`.

| module | ports | timing |
|---|---|---|
| `pwm_top` | `clk`, `pwm` | period 2^N clocks. Duty word advances once per period |
| `control_unit` | `clk`, `load`, `dataout[N-1:0]` | `dataout` += 1 at each edge with `load` high. Wraps |
| `pwm_datapath` | `clk`, `dutyin[N-1:0]`, `load`, `pwmout` | `dutyin` sampled at the edge that ends the overflow clock |
| `pwm_counter` | `clk`, `countout[N-1:0]`, `load` | +1 every clock. `load` = (count == 2^N-1), combinational |
| `duty_register` | `clk`, `load`, `dutyin`, `dutyout` | loads on a clock edge with `load` high |
| `duty_comparator` | `data1`, `data2`, `eqout` | combinational equality |
| `sr_latch` | `s`, `r`, `pwmout` | level-sensitive. Set has priority |

`pwm_counter` has an assertion: after an overflow clock the count must be zero.

Synthesis (generic, before technology mapping) gives 12 flip-flops and one
latch for the whole generator. An N-bit version has 3N flip-flops.

## What comes from the original design and what does not

Taken from the original design:

* the count / compare / latch structure;
* the 4-bit width;
* the block names and their pins;
* the exact wiring of the datapath: register to comparator input 1, counter to
  comparator input 2, comparator to latch reset, overflow to latch set and
  register load;
* reloading the duty word on overflow;
* the feedback of the overflow into a duty-word source;
* the two-pin interface;
* the 5 to 10 MHz reference clock.

The descriptions of the original design disagree on which latch input the
comparator drives. This design follows the wiring that matches the original
duty formula (duty grows with the word).

Choices made here:

* the control unit's stepping rule (+1 per period). Only its pins and its place
  in the loop are given;
* the overflow as a combinational decode of the all-ones count;
* set priority in the latch;
* zero power-up values instead of a reset.

Known differences from the original claims:

* The original build reported 20 slice flip-flops; this design has 12 plus a
  latch.
* A "10 MHz PWM frequency" is only possible with a 160 MHz clock. With a
  10 MHz clock the PWM runs at 625 kHz (312.5 kHz at 5 MHz).
* The duty range is 6.25 % to 100 %, not 0 % to 100 %.

## Testbenches and simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

* `tb_pwm_counter`: the count sequence, the overflow position and 16-clock
  spacing over 5 periods.
* `tb_duty_register`: random words and load pulses against a reference copy.
* `tb_duty_comparator`: all 256 input pairs.
* `tb_sr_latch`: set, reset, hold in both states, both inputs high, and random
  pairs.
* `tb_control_unit`: random load pulses, stepping and wrap-around.
* `tb_pwm_datapath`: random duty words that change at random points in the
  period. Each clock is checked against a reference model. Over 199 complete
  periods it also checks the period length and that the output is high for D+1
  clocks. Every one of the 16 duty values must occur.
* `tb_pwm_top`: the whole generator at its default size with only the clock
  driven. The expected output is computed from the clock index alone, over
  three full sweeps (48 periods). The testbench counts each mechanism, and
  each must occur:
  * overflows;
  * duty-word loads;
  * latch sets;
  * latch resets by the comparator;
  * all-high periods;
  * duty-word wrap-arounds.

Every testbench runs in well under a second. To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/pwm_pkg.sv tb/tb_pwm_top.sv \
          --top-module tb_pwm_top --Mdir obj_tb_pwm_top
./obj_tb_pwm_top/Vtb_pwm_top
```

Replace `tb_pwm_top` with any other testbench name. Files are found through
`-y rtl`. The package must be listed first.

To change the resolution, change `PWM_BITS` in `rtl/pwm_pkg.sv`, or override
`N` on `pwm_top`. The testbenches read `PWM_BITS`, so they follow the package.
