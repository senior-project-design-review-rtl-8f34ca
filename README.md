# Timer and output-compare unit for a small 68HC11-style microcontroller

This unit gives a microcontroller programmable delays. A 16-bit timer counts
up from a selectable clock. The user stores four 8-bit values in four compare
registers. Each register has a comparator that raises its output while the
timer's low byte equals the stored value. Each output therefore marks one
moment in every 256 timer steps, and the four outputs can be set apart from
each other. The timer's carry out flags every full 65536-step cycle, for
delays longer than 256 steps.

The unit is modelled on the timer/output-compare section of the Motorola
68HC11, reduced to its core. It has a clock divider, a free-running counter,
a register-select decoder, four registers and four equality comparators. The
RTL is synthesizable SystemVerilog on a single clock.

```
             clk_sel_i  clk_en_i                        rst
                 |         |                             |
 clk ---> [ clock_controller ] --tick--+--> [ timer16 (16 bit) ] --overflow_o
                                       |          | bits 7..0
                                       |          v
 reg_sel_i, reg_en_i --> [ reg_controller ]   comparator 0..3 --> match_o[3:0]
                                       | load[3:0]  ^
 acc_i (8 bit) ----------> [ register_bank: 4 x register8 ] --+
```

## Delay arithmetic

With divide select `k` (0..3), the timer steps once every 2^k input clocks.
Then:

| quantity | input clocks |
|---|---|
| one timer step | 2^k |
| `match_o[n]` high, once per round | 2^k (one timer step) |
| repeat interval of `match_o[n]` | 256 x 2^k |
| `overflow_o` high | 2^k (while the timer reads FFFFh) |
| repeat interval of `overflow_o` | 65536 x 2^k |

The position of a match within its 256-step round is the register value. The
distance between two match outputs is therefore the difference between their
register values, in timer steps.

## The clock controller: divided clocks as strobes

This is the part that most needs explaining, because the RTL represents it
differently from the original circuit.

In the original circuit, a 4-bit counter runs on the input clock while it is
enabled. Counter bit 0 is a square wave of twice the input period, bit 1 of
four times, and bit 2 of eight times. A 4:1 multiplexer picks one of them, or
the input clock itself, and that picked signal *is* the timer's clock.

This RTL keeps everything on the input clock. The counter is the same, but
the multiplexer picks a one-cycle **strobe** (`tick`) instead of a clock. For
select `k > 0`, the strobe is high in the input-clock cycle whose closing edge
is the rising edge of counter bit `k-1`. That is the cycle in which the low
`k` counter bits read `0` followed by `k-1` ones (`0`, `01`, `011` for
k = 1, 2, 3), with the enable high. The timer steps on that edge, exactly when
a timer clocked by the divided wave would. For select 0 the strobe is high in
every cycle. The input clock does not pass through the counter, so the enable
does not gate the strobe in that mode. The timer is gated by the same enable,
so it still stops.

Divide by 4, enable high, counter starting from 0:

```
cycle             :  0    1    2    3    4    5    6    7    8
counter bits 1..0 :  00   01   10   11   00   01   10   11   00
counter bit 1     :  0    0    1    1    0    0    1    1    0
tick              :  0    1    0    0    0    1    0    0    0
timer             :  T    T    T+1  T+1  T+1  T+1  T+2  T+2  T+2
```

A change of `clk_sel_i` takes effect at once. The next strobe comes when the
newly selected counter bit next rises, so the first period after a switch can
be shorter than 2^k. The fourth counter bit (period 16) is not selectable. It
is kept because the original counter has four bits, and it is only visible on
the clock controller's `div_o` port.

## The 16-bit timer

`timer16` counts up by one on every clock edge where the enable and the strobe
are both high, and wraps from FFFFh to 0000h. Its carry out (`overflow_o`) is
high while the count reads FFFFh and the timer is enabled. That is one timer
step long, and it ends with the wrap. Only bits 7..0 go to the comparators.
The upper byte serves only to space the carry out 65536 steps apart. `rst`
clears the count at once (asynchronous, active high).

## Loading the compare registers

The user puts a byte on `acc_i` (the accumulator value) and a register number
on `reg_sel_i`, and raises `reg_en_i`. `reg_controller` is a 1-to-4 decoder.
Register `n` gets a load strobe in a cycle where `reg_sel_i == n`, `reg_en_i`
is high and the clock controller's strobe is present. Since only one select
value exists at a time, at most one register is written per cycle, and an
assertion checks this.

Because the decoder uses the *selected* pulse, **a load waits for the next
timer step**. At divide by 1 a register loads on the next clock edge. At
divide by 8 the user must hold `reg_en_i` until a strobe arrives, up to 8
clocks. With a divided select and `clk_en_i` low, no strobe comes and no
register can be loaded. Select divide by 1 to load registers while the timer
is stopped.

`register_bank` holds four `register8`s. Each `register8` is eight `dff` cells
that share one load enable. The registers hold their value until the next
load, and `rst` clears them to zero.

## Comparators

Each `comparator` XORs its register with timer bits 7..0 bit by bit and NORs
the eight results. The output is 1 only when all bits agree. The comparators
are combinational, so `match_o` changes in the same cycle as the timer.

## Ports of `mcu_timer_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | input clock, the fastest timer rate |
| `rst` | in | 1 | asynchronous, active high. Clears the timer, the divider and the four registers |
| `acc_i` | in | 8 | accumulator value to store |
| `reg_sel_i` | in | 2 | register to load (0..3) |
| `reg_en_i` | in | 1 | load enable |
| `clk_sel_i` | in | 2 | 0: clk, 1: clk/2, 2: clk/4, 3: clk/8 |
| `clk_en_i` | in | 1 | runs the divider and the timer |
| `match_o` | out | 4 | `match_o[n]` = (register n == timer bits 7..0) |
| `overflow_o` | out | 1 | timer carry out |

Parameters (`DATA_WIDTH` 8, `TIMER_WIDTH` 16, `NUM_REGS` 4, `DIV_WIDTH` 4)
default to the original sizes and come from `mcu_timer_pkg`. `reg_controller`
is written for any `NUM_REGS`, but the clock-select decode needs
`DIV_WIDTH >= 3`.

## Where this RTL departs from the original circuit

- **One clock.** The original feeds divided clocks to the timer and switches
  each register's clock on to load it. Here, clock enables (`tick`, and the
  load strobes) replace them. The observable behaviour, one timer step per
  selected pulse and one load per pulse, is the same, and the design is free
  of gated clocks.
- **Register controller clock.** The original's description says the selected
  clock feeds both the timer and the register controller, and this RTL follows
  that. Its block diagram could also be read as clocking the register
  controller from the raw input clock. To get that behaviour, tie `pulse_i` of
  `u_regctl` in `mcu_timer_top` to 1.
- **Enables.** The user has one clock-controller enable and one
  register-controller enable. The clock-controller enable also starts and
  stops the timer, because the timer has no enable input of its own.
- **Reset.** A single reset clears the timer, the divider and the registers.
  The original names only a timer reset. It also gives the registers a reset
  input without saying what drives it.
- **Accumulator.** The accumulator is only the source of the 8-bit data, so
  it appears here as the input port `acc_i`, not as a register.
- **D flip-flop cell.** The original builds it from gates with a Q and an
  inverted Q output. Here it is a behavioural edge-triggered flip-flop with a
  load enable and reset, and without the inverted output, which nothing uses.

## Files

| file | contents |
|---|---|
| `rtl/mcu_timer_pkg.sv` | sizes, types, clock-select enum |
| `rtl/mcu_timer_top.sv` | the whole unit |
| `rtl/clock_controller.sv` | divider counter and select → `tick` |
| `rtl/timer16.sv` | 16-bit timer with carry out |
| `rtl/reg_controller.sv` | 1-to-4 load decoder |
| `rtl/register_bank.sv`, `rtl/register8.sv`, `rtl/dff.sv` | compare registers |
| `rtl/comparator.sv` | XOR/NOR equality compare |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if it hangs. From the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/mcu_timer_pkg.sv tb/mcu_timer_top_tb.sv --top-module mcu_timer_top_tb -Mdir obj
./obj/Vmcu_timer_top_tb
```

Replace `mcu_timer_top_tb` with any other testbench name to run that one.

## What the tests establish

- `mcu_timer_top_tb` runs the unit at its full default size, for about 236,000
  clocks. A reference model in the testbench is written from the rules above,
  not from the RTL. The testbench compares every match bit, the carry out and
  the internal timer value with the model in every cycle.
- It measures each comparator's repeat interval (256 x 2^k) and match width
  (2^k) at all four divide ratios. It also runs two full 65536-step timer
  cycles through the carry out and wrap, at divide by 1 and by 2.
- It also covers:
  - stopping the timer with the enable;
  - loads that must wait for a divided pulse;
  - a reset in mid-run;
  - 20,000 cycles of random stimulus.
- It fails if any of these events never happens.
- The block testbenches cover each module:
  - exhaustively for the comparator and the decoder;
  - with long random runs for the registers and the timer (more than
    65536 steps);
  - per divide ratio for the clock controller, which checks the strobe
    against the rising edge of the divided wave.
- Each testbench was shown to fail on a deliberately broken copy of its
  module.

Not checked: gate-level or layout equivalence with the original transistor
design, and behaviour of `match_o` glitches in silicon (the outputs are
combinational).
