# Three-digit signed BCD adder

This design adds two signed three-digit decimal numbers on a small FPGA board and shows the
result on a four-digit seven-segment display. Each operand is stored as a sign bit plus
three BCD digits (13 bits, sign-magnitude), so the range is -999 to +999. Because the
numbers are signed, "adding" them means adding the magnitudes when the signs agree and
subtracting them when the signs differ. The hardware does this with one chain of three BCD
digit adders that can each add or subtract. A small control unit decides which one to do,
and whether the operands must be exchanged so that the smaller magnitude is always
subtracted from the larger.

## Using it on the board

| Input / output | Use |
|---|---|
| `sw_digit[3:0]` | BCD digit to key in |
| `sw_sign` | sign of the operand being keyed, 1 = negative |
| `sw_absel` | 0: operand A, 1: operand B (both for loading and for `sw_showreg`) |
| `sw_showreg` | 1: display the operand chosen by `sw_absel` instead of the result |
| `btn_load` | each press shifts one digit into the chosen operand |
| `btn_clear` | zeroes both operands and both signs |
| `an[3:0]`, `seg[6:0]`, `dp` | seven-segment display, all active low; `an[0]` is the rightmost digit, `seg` is `{g,f,e,d,c,b,a}` |
| `led_overflow` | lit when the sum needs a fourth digit |

There are not enough switches for six digits at once, so operands are keyed one digit at a
time. Key the hundreds digit first. Each press of `load` shifts the operand one place up and
puts the new digit in the units position, so three presses enter `h`, `t`, `u`. The sign
switch is sampled on every press, and the last press decides the sign. The result is always
live. It is the signed sum of whatever the registers hold at the moment.

The display shows the three result digits on the right. The leftmost digit shows a minus
sign (middle segment only) for a negative result and is dark otherwise. A zero result never
shows a minus sign.

## How a signed sum is formed

The control unit (`ctlunit`) looks at the two stored signs and at the result of the
magnitude comparator:

| Signs | \|A\| vs \|B\| | Digit adders | Operands | Result sign |
|---|---|---|---|---|
| equal | any | add | A, B | common sign |
| differ | A > B | subtract | A − B | sign of A |
| differ | A < B | subtract | B − A (swapped) | sign of B |
| differ | A = B | subtract | A − B = 0 | + (zero rule) |

With `sw_showreg = 1` the adders add, the register unit feeds the chosen operand into the A
side with 0 on the B side, and the display shows that operand and its sign. No separate
display path is needed.

Overflow can only happen when adding, since a difference of two magnitudes up to 999 always
fits. It is the carry out of the hundreds digit adder. On overflow the display shows the low
three digits of the sum with the common sign. For example, −500 + −500 shows "−000" with the
LED lit.

The only feedback from the datapath to the control unit is for the sign. The control unit
gets the carry out of the hundreds digit and a "result is zero" flag, which is a NOR of the
three sum digits. Add/subtract and swap depend only on the registers, not on the sum, so
there is no combinational loop.

## The digit adder (`digitadd`)

Each digit adder works in two steps: a plain 4-bit binary add or subtract, then a
correction add.

* **Add:** `t = a + b + cin` lies in 0..19. If `t > 9`, add 6 and keep 4 bits. The carry
  out is then 1. For example, 9 + 2 = 11 → 11 + 6 = 17 → digit 1, carry 1.
* **Subtract:** `t = a − b − bin` lies in −10..9. If `t` is negative, add 10 (the same as
  subtracting 6 modulo 16). The borrow out is then 1. For example, 3 − 6 = −3 → 13 (4-bit)
  + 10 = 23 → digit 7, borrow 1.

Three of these are chained units → tens → hundreds through `cbin`/`cbout`. The units
adder's carry in is 0. Inputs above 9 are outside the contract.

## Operand registers and comparator (`regunit`)

One `regunit` holds one digit position of both operands. Chained together, the three A
digits form a 4-bit-wide, three-deep shift register, and the three B digits form another.
Both shift toward the hundreds position. `sw_absel` decides which chain a `load` press
shifts.

Each stage also holds:

* **Operand multiplexers.** These give straight, swapped, or "register plus zero" for
  `sw_showreg`.
* **One stage of a ripple magnitude comparator.** A stage passes on the comparison from the
  stage below when its two digits are equal. Otherwise it replaces that comparison with its
  own digit comparison. The chain runs units → hundreds, so the hundreds stage's output
  `{a_gt_b, a_lt_b}` compares the full numbers. When both flags are 0, the numbers are equal.
  The comparison uses the stored registers, so it is not affected by the swap it controls.

## Display scanning (`ssctrl`, `ssconv`)

The four display digits share their cathode lines, so only one digit is lit at a time.
`ssctrl` has a `DIV_BITS`-bit prescaler that advances a 4-bit one-hot ring counter. The
ring drives the active-low anodes directly and also selects which code goes through
`ssconv` to the cathodes, so the anodes and cathodes always switch in the same cycle.
Positions 0..2 are the units, tens and hundreds digits. Position 3 is the sign.

The sign position uses BCD codes that never occur as digits: code 10 shows a minus sign and
code 11 shows a blank digit. `ssconv` decodes codes 0..9 as decimal glyphs and 10 as a
minus sign, and leaves every other code dark. The decimal point is held off.

With the default `DIV_BITS = 16`, each digit is lit for 65,536 cycles: 1.3 ms at 50 MHz, or
a full refresh at about 190 Hz. For a different clock, change `DIV_BITS`.

## Timing

* Buttons pass through a two-flip-flop synchronizer. `load` acts on the rising edge of the
  synchronized button, so one press loads exactly one digit. `clear` acts while it is held.
  The buttons are not debounced. A bouncing `load` button can load a digit more than once,
  so debounce it on the board or add a debouncer in front.
* The operand registers change two to three clock edges after the button. The sum is
  combinational from the registers, through three rippled digit adders and the control
  logic, so it is valid in the next cycle.
* The display catches up within one full scan (4 × 2^`DIV_BITS` cycles).
* `rst` is synchronous and active high. It clears the operands and signs and restarts the
  display scan at the rightmost digit.

## Files

| File | Contents |
|---|---|
| `rtl/bcd_pkg.sv` | shared types: BCD digit, comparison struct, segment codes, `NDIGITS = 3` |
| `rtl/digitadd.sv` | BCD digit adder/subtractor |
| `rtl/regunit.sv` | one digit of the operand shift registers, swap/show muxes, comparator stage |
| `rtl/ctlunit.sv` | sign flip-flops, add/subtract, swap, result sign, overflow |
| `rtl/ssconv.sv` | code → seven-segment cathodes |
| `rtl/ssctrl.sv` | display multiplexer with ring counter |
| `rtl/bcd_adder_top.sv` | board-level top: button synchronizers, three digit slices, control, display |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs.

* `tb_digitadd` checks all 400 digit/carry/mode combinations against decimal arithmetic,
  plus the eight sample rows of a grading table for the digit adder. Four of those rows add
  (`3+6=9`, `9+2=1` carry, `3+6+1=0` carry, `9+2+1=2` carry). The other four subtract
  (`3−6=7` borrow, `9−2=7`, `3−6−1=6` borrow, `9−2−1=6`).
* `tb_regunit` runs random load/clear sequences against a model. After every cycle it checks
  every mux setting and every comparator input.
* `tb_ctlunit` checks every sign pair × comparison × mode × feedback combination.
* `tb_ssconv` checks all 16 codes against a segment table of its own.
* `tb_ssctrl` checks, with a 2-bit prescaler, that exactly one anode is low, that the
  cathodes match that digit, and that each digit has a 4-cycle dwell and the right scan
  order.
* `tb_bcd_adder_top` runs the full design at its default parameters. It keys operands in
  through the switch and button ports and reads results back only by decoding the scanned
  display. It covers directed cases (carry through all digits, borrow ripple, swap,
  overflow, −0 + −0, equal magnitudes with opposite signs, show-register for A and B,
  clear) and random operations; `+NRAND=<n>` sets the number of random ones (default 24).
  It counts how often each mechanism occurred and fails if any never did. It takes about
  13 million cycles, a few seconds in Verilator.

To simulate with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bcd_adder_top \
    -y rtl -y tb +libext+.sv rtl/bcd_pkg.sv tb/tb_bcd_adder_top.sv
./obj_dir/Vtb_bcd_adder_top +NRAND=200
```

Swap the top module and the testbench file to run any other test. The package must come
first on the command line.

## Design choices not fixed by the original specification

* Clock, reset, button synchronizers and the load edge detector are this design's own, as
  are the scan rate and scan order of the display. Button debouncing is not included.
* The correction constants (+6 after an add carry, +10 after a subtract borrow) follow from
  the two-step adder scheme. They were not given as numbers.
* The comparator encoding `{a_gt_b, a_lt_b}` and its units-to-hundreds direction, which
  follows the shift direction, are this design's choice.
* Overflow is shown only on the LED. The sign digit shows a minus sign or nothing. Showing
  overflow in the sign digit as well would only need another unused code in `ssconv` and
  one more case in `ssctrl`.
* On overflow the sign is kept (for example "−000"). The "zero is positive" rule applies
  only to a true zero.
* In show-register mode the register's stored sign is shown, except that a zero magnitude
  is shown without a minus sign, the same as a zero result.
* The design does not cover the stand-alone test setup for a single digit adder, where the
  carry in and add/subtract control come from push-buttons and the output goes to one
  display digit. `digitadd` is the same block; only the board wiring differs.
