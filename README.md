# Four-digit BCD up/down counter for a small CPLD board

A binary counter is awkward to show on a decimal display; a counter that
keeps each decimal digit in its own 4-bit field (binary-coded decimal, BCD)
can drive a 7-segment display digit by digit with no conversion. This RTL
builds such a counter from one reusable part, a single BCD digit that counts
0..9 up or down, and chains four of them into a counter that runs from 0000
to 9999. Around it sits a small board design: two pushbuttons count up
(1 kHz) or down (100 Hz) or, pushed together, clear the count, and the four
digits are shown on a multiplexed 7-segment LED display. It targets a 50 MHz
clock and a 15-pin interface, sized for a MAX II EPM240-class CPLD.

```
 up_in ─┐   ┌────────────────┐ reset  ┌───────────────────────────────┐ digits ┌─────────────┐ a..g, dp
        ├──►│ button_control ├───────►│ bcd_counter_chain             ├───────►│ display_mux ├─────────►
down_in─┘   │ sync, 1 kHz /  │ enable │ bcdcount ×4, carry → enable   │        │ seg7_decode │ en[3:0]
            │ 100 Hz ticks   │ up     │                               │        └─────────────┘
            └────────────────┘        └───────────────────────────────┘
```

## The digit: `bcdcount`

One decimal digit with inputs `clock`, `reset`, `enable`, `up` and outputs
`count` (4 bits) and `carry`. On each rising clock edge:

| reset | enable | up | next count |
|-------|--------|----|------------|
| 1     | x      | x  | 0 |
| 0     | 1      | 1  | count + 1, 9 → 0 |
| 0     | 1      | 0  | count − 1, 0 → 9 |
| 0     | 0      | x  | count (hold) |

Reset is synchronous and wins over enable. `carry` is **combinational**:

| count | enable | up | carry |
|-------|--------|----|-------|
| 9     | 1      | 1  | 1 |
| 0     | 1      | 0  | 1 (a borrow) |
| other |        |    | 0 |

The carry is asserted in the same cycle as the step that wraps the digit,
not a cycle later, and only while the digit is enabled. That is what makes
the chain below work. `enable` is an ordinary synchronous input; it is never
used as a clock, and the digit does not change on cycles in which it is low.

The codes 10..15 are not decimal digits. They can only be present before
the first reset (a flip-flop's power-up value); a step from any of them goes
to 0 (up) or 9 (down), so the digit falls back into 0..9 at once.

## Cascading digits: carry drives the next enable

`bcd_counter_chain` (`NUM_DIGITS` = 4) connects the digits like this:

```
enable ─► digit0 ─carry─► digit1 ─carry─► digit2 ─carry─► digit3 ─carry─► carry out
           (clock, reset and up go to every digit)
```

Digit *i+1* may step only in a cycle in which digit *i* is stepping *and*
wrapping. Going up from 0999, digit 0 is 9 and enabled so its carry is 1,
which enables digit 1, which is also 9 and so passes the carry on, and so
on: on the next edge every digit updates together and the counter reads
1000. Going down from 1000 the same path carries borrows: the zeros pass the
borrow to the 1, and 0999 follows. Because each carry is combinational, the
whole ripple settles within one clock period; there is no per-digit delay
and no intermediate wrong value at the outputs. The price is a chain of
gates that grows with the number of digits, which at four digits is far
inside a 20 ns period.

The carry out of the top digit marks the cycle in which the counter wraps,
9999 → 0000 up or 0000 → 9999 down. The board design leaves it unused.

## Button control: `button_control`

The board has no reset pin and only two buttons, so the controller decodes
the buttons into the counter's three controls:

| up_in pushed | down_in pushed | counter does |
|---|---|---|
| yes | no  | one step up every `CLK_HZ/UP_HZ` = 50,000 cycles (1 kHz) |
| no  | yes | one step down every `CLK_HZ/DOWN_HZ` = 500,000 cycles (100 Hz) |
| yes | yes | `reset` (count cleared, prescalers cleared) |
| no  | no  | holds |

Holding up for one second therefore gives just over 1000 counts; holding
down for one second from 0000 wraps to the 9900s.

Inside: each pin first goes through a two-flip-flop synchroniser, because
the buttons are asynchronous to the clock. Two free-running prescalers each
produce a one-cycle tick at the end of their period, and `enable` is the up
tick gated by "only up pushed" or the down tick gated by "only down
pushed". Clearing the prescalers during reset makes the first count after a
reset come exactly one period after the buttons are let go.

Timing: a change on a pin reaches the controls two cycles later. Holding a
button for a whole number of periods gives exactly that many counts.

There is no debouncer. A bouncing contact can at most shift the start or end
of a press by a few microseconds, which at these rates can add or lose a
single count. Pressing both buttons not quite at the same time lets a
count or two through before the reset takes over; the reset then clears it.

**Button polarity.** The pins have the pad's weak pull-up enabled and are
meant to be wired to ground through each button's *normally-closed*
contact. A released button then holds its pin low, and pushing it opens the
contact so the pull-up takes the pin high; the controller therefore treats
a high pin as pushed (`PRESSED_LEVEL = 1`). If the buttons are wired through
normally-open contacts instead, set `PRESSED_LEVEL = 0`.

## Display: `display_mux` and `seg7_decode`

All four digits share the segment lines a..g and dp; each digit has its own
enable `en[i]`. The multiplexer lights one digit at a time for
`DIGIT_CYCLES` = 50,000 cycles (1 ms) and then moves to the next, so the
display refreshes at 250 Hz, which the eye sees as steady. `en[0]` is the
least significant digit. `seg7_decode` maps a digit to segments (bit 0 = a
… bit 6 = g; 6 and 9 with tails; codes 10..15 blank). The decimal point
is never lit. Segments and enables are active high; a display that needs
active-low drive (for example a common-anode part driven directly) needs
the outputs inverted in `lab5`.

The multiplexer has no reset: its two counters use `>=` compares and settle
into range within one refresh period whatever they power up with.

## Board top: `lab5`

`lab5` wires the three parts together and has exactly the board's 15 pins:

| port | pin | port | pin |
|---|---|---|---|
| clock (50 MHz) | PIN_12 | e | PIN_30 |
| up_in (weak pull-up) | PIN_99 | f | PIN_52 |
| down_in (weak pull-up) | PIN_97 | g | PIN_40 |
| a | PIN_33 | dp | PIN_36 |
| b | PIN_44 | en[0] | PIN_42 |
| c | PIN_38 | en[1] | PIN_48 |
| d | PIN_34 | en[2] | PIN_50 |
|   |        | en[3] | PIN_35 |

Pin locations and pull-ups belong in the FPGA/CPLD tool's constraints, and
the clock (50 MHz) and the asynchronous inputs in its timing constraints;
they are not in the RTL. The design holds 73 flip-flops: 16 for the digits,
4 for the synchronisers, 16 + 19 for the prescalers and 18 for the display
multiplexer.

Parameters of `lab5` (all with the board values as defaults):

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50,000,000 | clock frequency |
| `UP_HZ` | 1,000 | counting-up rate |
| `DOWN_HZ` | 100 | counting-down rate |
| `NUM_DIGITS` | 4 | digits in the counter and on the display |
| `DIGIT_CYCLES` | 50,000 | cycles each display digit stays lit |

If `CLK_HZ` is not a multiple of a rate, the period is rounded down.

## What is specified and what is chosen here

Taken from the specification this design follows: the digit's behaviour
(synchronous, reset to zero, count up/down on enable, wrap 0..9) and its
carry/borrow table; chaining by carry-to-enable with shared clock, reset and
up; four digits; a 50 MHz clock; the up rate of 1 kHz and down rate of
100 Hz; reset by both buttons; the 15 pins and their names; pull-ups on the
button pins and normally-closed contacts.

Chosen here, where the specification says nothing: a synchronous (not
asynchronous) reset reading of "set to zero when reset is asserted"; how
codes 10..15 behave; the synchroniser, the lack of a debouncer and the two
prescalers; the pressed-is-high button polarity (worked out from the
pull-up and normally-closed wiring, not stated); the whole display
multiplexer and decoder (the original uses a display driver from an earlier
exercise, whose design, refresh rate and polarities are not given); active-high
segments and enables; `en[0]` as the least significant digit; dp off.

Not part of the RTL: the LED display, the buttons and the pad pull-ups
(physical parts), and the pin constraints (tool settings).

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`; each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/bcd_pkg.sv tb/tb_lab5.sv --top-module tb_lab5
./obj_dir/Vtb_lab5
```

`-y rtl` lets Verilator find each module in the file of its own name; the
package is named explicitly so it is read first. Replace `tb_lab5` by any
testbench below.

| testbench | what it shows | run time |
|---|---|---|
| `tb_bcdcount` | carry table for every count and input; 2000 random cycles against a modulo-10 model | < 1 s |
| `tb_bcd_counter_chain` | counts up through 9999 → 0000, down through 0000 → 9999, 20,000 random cycles against a modulo-10,000 model; a carry reaches every digit | seconds |
| `tb_button_control` | scaled clock; reset after the synchroniser, exact pulse spacing and direction for up and down, nothing when idle | < 1 s |
| `tb_display_mux` | one enable at a time, rotation order, exact dwell, segment patterns from its own table | seconds |
| `tb_lab5` | whole board at a scaled clock (2 cycles per up count, 20 per down count), read only at the pins; checks each reading against the count the hold time allows and that reset, up, down, carries into digits 1..3, both wraps and every display position all occur | seconds |
| `tb_lab5_full` | whole board at the real 50 MHz parameters: reset, 1.01 s of up reads 1010, reset, 1.01 s of down reads 9899 (about 101 million cycles) | about 40 s |

The testbenches decode the display with their own segment table and keep
their own reference counts, so they do not share code with the design.
