# Keyboard calculator with stack memory, square root and VGA seven-segment display

This is a small FPGA system for a Spartan-3 class board (XC3S200, 50 MHz oscillator). It works as
a calculator. You type unsigned operands (0..255) and operators on a PS/2 keyboard. Each entry is
pushed into an 8 kB single-port block RAM used as a stack. Pressing Enter pops the newest
expression, evaluates it and shows it on a 640x480 VGA monitor, drawn as large emulated
seven-segment digits, and on the board's four-digit LED display. Supported operations:

* addition, subtraction, multiplication, modulo 3;
* square root with three correct decimals. The square root uses Newton-Raphson iteration, a
  seed table and a pipelined fixed-point divider.

The design follows the 2014 course project description of EITF35 "Introduction to Structured
VLSI Design" (Lund University): project 1, the calculator with memory, and project 2, the square
root unit, integrated. Where that description leaves things open, the choices are this design's
own. They are listed in [Choices and departures](#choices-and-departures).

## Using it

| Input | Function |
|---|---|
| digit keys (main row or keypad) | type an operand, three digits: `009` for 9. Values above 255 become 255 (`1234` -> 255). |
| keypad `+`, keypad `-` or `-`, keypad `*` | add, subtract, multiply |
| `m` | modulo 3 (one operand) |
| `s` | square root (one operand) |
| Backspace | delete the last digit, or the operator |
| BTN[1] | latch the typed entry (it turns cyan on screen) |
| BTN[2] | store the latched entry on the stack |
| Enter | pop the newest complete expression, evaluate and display it |
| BTN[0] | show the square root of the value on the 8 switches |
| BTN[3] | reset |
| LED[7:0] | stack pointer (number of stored bytes), low 8 bits |

An expression is entered as `a`, operator, `b`, each latched and stored. A one-operand operator
takes only `a op`. For example, to get 98 + 99, do this:

* type `098` and press BTN[1], BTN[2];
* type `+` and press BTN[1], BTN[2];
* type `099` and press BTN[1], BTN[2];
* press Enter.

The screen then shows `098+099=+197`. Further Enter presses pop older expressions. You can store
new expressions at any time between them.

## The stack protocol

This is the part that most needs explaining. It lives in `stack_controller`.

**Byte codes.** The RAM is 8 bits wide and holds operands and operators in the same bytes. The
operators therefore take the codes 130..135:

| Code | Meaning |
|---|---|
| 130 | `+` |
| 131 | `-` |
| 132 | `*` |
| 133 | mod 3 |
| 134 | square root |
| 135 | reserved for `=` |

An operand in 130..135 would be mistaken for an operator, so such a value is refused at latch
time. You then correct it with Backspace.

**Grammar.** The controller has a three-state grammar register: *expect a*, *expect operator*,
*expect b*. BTN[1] latches the entry only if it is the kind the grammar expects:

* a number (not 130..135) for *a* and *b*;
* an operator for *operator*.

Anything else pulses `reject` and nothing is latched. BTN[2] writes the latched byte at the
stack pointer `sp` and increments `sp`. Then the grammar moves on: *a* -> *operator* -> *b* -> *a*.
After a one-operand operator it goes straight back to *a*. Only complete groups (`a op b` or
`a op`) ever sit below an unfinished one. A first operand is accepted only if a whole 3-byte group
still fits in the RAM, so the stack never overflows in mid-group.

**Popping.** Enter is acted on only when the grammar is at *expect a*, meaning no group is half
entered, and `sp > 0`. The controller then reads downwards through the RAM's registered read port:

| Cycle | Address | Data that arrives |
|---|---|---|
| POP1 | sp-1 | - |
| POP2 | sp-2 | top byte |
| POP3 | sp-3 | second byte. If the top byte is an operator code, the group is `a op`: op = top, a = second, `sp -= 2`. |
| POP4 | - | third byte: a = third, op = second, b = top, `sp -= 3` |

Then the ALU is started. When its `done` arrives, the operands, operator and result are copied
into the `expr` structure that both displays read. Groups therefore come back newest first. A pop
takes 5 or 6 cycles plus the ALU time: 1 cycle for the integer operations, 58 for the square root.

Stores are one-cycle RAM writes. The RAM port is shared: the address is `sp` when idle and the
pop addresses during a pop, so a store and a pop never coincide. Two assertions check this and
that `sp` never exceeds the RAM depth.

## Arithmetic

`alu` takes two unsigned bytes and returns sign and magnitude (`alu_result_t`):

* **Subtraction** is the only operation that can be negative.
* **Overflow** is set when the magnitude exceeds 999, the largest value the three result digits
  can show. Only a product can do that (255 x 255 = 65025).
* **Underflow** cannot occur: with unsigned 8-bit operands no result is below -255.

**Square root (`sqrt_unit`).** It computes x' = (x + n/x) / 2 in Q4.10 fixed point, with 10
fraction bits for three decimals.

* **Seed:** a 32-entry table indexed by `n[7:3]`, entry i = round(sqrt(8i+4) * 1024), the root
  of the middle of each interval.
* **Each iteration:**
  1. Send `n << 10` divided by `x` to the divider. The quotient is n/x with integer and 10-bit
     fraction parts.
  2. Wait for the result. Only one division is in flight at a time.
  3. Add x and the quotient as one fixed-point word, add 1 and shift right. The halving
     therefore rounds to nearest.
* **Iterations:** three.
* **Accuracy:** the largest error over all 256 inputs is 0.00049, below half of 1/1024. Rounding
  matters here: with truncation sqrt(255) would come out as 16351/1024 = 15.967 instead of
  15.968. More iterations do not reduce the error further.
* **Zero:** n = 0 returns 0 at once.

**Divider (`divider`).** A restoring divider unrolled into one registered stage per quotient bit.
It accepts a new division every clock and delivers it `QUOT_INT_W + FRAC_W` cycles later with
`out_valid`. This matches a divider core set to "one clock per division". At its defaults it is a
general 18-bit by 14-bit divider: 18 integer + 10 fraction bits = 28 stages. The square-root unit
sets `QUOT_INT_W` to 8, because n/x is always below 256 there: x never drops below 1.0. The top 10
dividend bits then go straight into the partial remainder, the 10 stages that would only produce
leading zeros disappear, and the latency is 18. An assertion checks that the caller keeps to the
bound. This cuts the square-root unit from about 1300 to about 880 LUTs.

**Decimal conversion (`result_formatter`).** The magnitude becomes three BCD digits by
shift-and-add-3. The ten fraction bits become floor(frac * 1000 / 1024), also converted to BCD.
Decimals are truncated, not rounded.

## The displays

**VGA timing (`vga_controller`).** Two counters walk the standard 640x480@60 Hz frame at 25 MHz:

| Direction | Visible | Front porch | Sync | Back porch | Total |
|---|---|---|---|---|---|
| Horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| Vertical (lines) | 480 | 10 | 2 | 33 | 525 |

Sync is active low. `blank` marks the invisible part.

**Picture (`display_controller`).** The screen has two lines of 32x64-pixel character cells,
starting at x = 64:

* y = 96..159: the last result, as `aaa op bbb = ±RRR`. A square root shows as `+15.968`, and an
  overflow as a red `OF`.
* y = 288..351: the entry being typed. It is white, and cyan once latched.

Every digit on the screen is drawn by the same single `seg7_engine`. That engine is a purely
combinational test of whether pixel (x, y) of a cell lies on a lit segment. Operators, `=`, the
sign and the letters O and F are 8x16 bitmaps in `glyph_rom`, scaled up four times. The
controller is a three-stage pipeline:

1. look up the cell, run the segment test and address the ROM;
2. choose between the ROM bit and the segment bit;
3. register the colour.

hsync and vsync are delayed by the same two cycles. Colour is 3-bit RGB: digits green, operators
yellow, overflow red.

**Board display (`board_seg7`).** The four common-anode digits are multiplexed by the top two
bits of a 17-bit counter, about 190 Hz per full scan. It shows:

* an integer result as sign and three digits (`-195`);
* a root as `15.96`;
* an overflow as `-OF-`, where the O looks like a 0.

## Clock, reset, inputs

**Clock.** `dcm_clkdiv` divides the 50 MHz oscillator by two to the 25 MHz clock that runs the
whole design. In the FPGA this job is done by the vendor's clock-manager primitive. The file is a
behavioural model of it with the same ports, written as a toggle flip-flop plus a lock counter.

**Reset.** BTN[3], synchronised, and held until the clock manager reports lock.

**Buttons.** `debouncer` accepts a new level only after 250 000 stable cycles (10 ms) and gives
one pulse per press.

**Keyboard.** `ps2_receiver` samples the PS/2 frame on falling PS/2 clock edges: start bit,
8 data bits LSB first, odd parity, stop bit. It checks the frame and drops a half-received frame
after 200 us of silence. `key_decoder` turns set-2 scan codes into key events. It ignores the
release code that follows F0 and treats an E0 prefix as transparent. `entry_buffer` keeps up to
four typed BCD digits and their value saturated to 255, or one operator.

## Files

All RTL is in `rtl/`, one module or package per file. Testbenches are in `tb/`.

| Module | Role |
|---|---|
| `calc_pkg` | shared types (`key_event_t`, `entry_t`, `alu_result_t`, `expr_t`, ...), operator codes, BCD and segment functions |
| `calc_top` | top level, board pins |
| `dcm_clkdiv` | behavioural model of the clock manager (÷2) |
| `debouncer` | button debounce and press pulse |
| `ps2_receiver`, `key_decoder` | keyboard |
| `entry_buffer` | typed number or operator |
| `stack_controller` | latch/store/pop protocol, RAM and ALU sequencing |
| `sp_ram` | 8192 x 8 single-port RAM, registered read |
| `ram_test_ctrl` | RAM bring-up fixture (`RAM_TEST` variant) |
| `alu`, `sqrt_unit`, `divider` | arithmetic |
| `result_formatter` | binary to BCD |
| `vga_controller`, `display_controller`, `seg7_engine`, `glyph_rom` | VGA picture |
| `board_seg7` | board LED display |

`calc_top` has three parameters:

* `DEBOUNCE_CYCLES` (250 000) and `REFRESH_W` (17) default to the hardware values. They are only
  lowered to shorten simulations.
* `RAM_TEST` (0) set to 1 builds the RAM bring-up variant described below.

## RAM bring-up variant

Before the calculator's controller is trusted, the stack RAM can be exercised by hand.
`calc_top #(.RAM_TEST(1))` hands the RAM port to `ram_test_ctrl`:

* the last digit typed on the keyboard is the write data, with the upper 4 bits zero;
* BTN[1] latches it into the memory input register;
* BTN[2] writes it at the current address and steps the address counter: up with SWITCH[0] = 0,
  down with SWITCH[0] = 1;
* a BTN[2] press with nothing freshly latched only steps, so you can walk back over stored words
  and read them without overwriting them;
* the board display shows the typed digit, with its point lit while a value waits, followed by
  the addressed word in decimal. The LEDs show the address.

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. With
Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/calc_pkg.sv tb/tb_calc_top.sv \
          --top-module tb_calc_top -Mdir obj_top
./obj_top/Vtb_calc_top
```

Replace `tb_calc_top` with any other testbench name. `tb_calc_top` runs the whole calculator at
its default parameters, from the pins, and takes about half a minute:

* a keyboard model types five expressions, including a saturated 4-digit number, a refused
  operand 133 corrected with Backspace, and an Enter in mid-group;
* bouncing buttons latch and store the entries;
* the expressions are popped with a new one stored in between;
* BTN[0] runs the switch square root.

It reads the results back from the multiplexed board display and checks the VGA line and frame
periods. It also counts stores, pops, refusals, backspaces, saturation, overflow, negative
results, square roots, one-operand operations, ignored key releases, ignored mid-group Enters and
the switch square root, and fails if any of them never happened.

The block testbenches check each module against values computed independently in the testbench:

* `tb_divider`: 400 pipelined divisions and their 28-cycle latency, and the same again for
  the shortened 18-stage form.
* `tb_sqrt_unit`: all 256 roots and their 58-cycle run time.
* `tb_display_controller`: whole captured VGA frames, tested pixel by pixel at chosen points.
* `tb_calc_top_ramtest`: the `RAM_TEST` variant from the pins, writing with the address counting
  up and reading back with it counting down.
* The other modules each have a similar testbench.

## Choices and departures

Fixed by the project description:

* 8 kB x 8 RAM used as a stack;
* operator codes in 130..135, with those values refused as operands;
* three-digit operand entry, with saturation to 255 and Backspace;
* BTN[1] to latch, BTN[2] to store, BTN[3] to reset, BTN[0] with the switches for the root;
* Enter popping one expression;
* signed three-digit results with an overflow mark;
* Newton-Raphson square root with a table seed and a divider, 10 fraction bits, three decimals;
* 640x480@60 Hz VGA from a 25 MHz clock made by halving the board clock;
* 3-bit colour;
* one seven-segment engine for all digits, operators from a ROM;
* the result also on the board display.

Chosen here:

* The order within a group (`a op b`) and newest-first popping.
* The grammar check, and the refusal of an Enter in mid-group or on an empty stack.
* Which code means which operator.
* The key assignments other than Enter, Backspace and `s`.
* The four-digit entry limit.
* Overflow meaning "more than 999". Underflow cannot happen with unsigned byte operands.
* Divider widths 18/14 and the pipelined divider.
* The 32-entry seed table, three iterations, round-to-nearest halving.
* The screen layout, cell size and colours. The 8x16 glyph bitmaps.
* The VGA porch and sync values, which are the standard 640x480@60 Hz timing.
* The 10 ms debounce window.
* The PS/2 timeout.
* The board display format.

Not included, or not verified:

* **The welcome-message picture ROM** of the VGA reference design. Its content is an image that
  is not part of the description. The glyph ROM takes its place.
* **Area.** The square-root unit must use under 35 % of the XC3S200's slices (about 670 of
  1920). This has not been checked with the vendor tools. An open-source mapping to Spartan-3
  cells gives 879 LUT4 and 657 flip-flops, at least 440 slices at two of each per slice, so it
  should fit with some margin.