# Two-digit decimal display on a multiplexed seven-segment module

This design takes an unsigned binary number, for example from four slide
switches, and shows it in decimal on a small two-digit seven-segment LED
module. The module has only eight signal pins: seven segment lines
(A to G), which go to both digits, and one select line, C. Only one of the
two digits can be lit at a time, so a two-digit number is shown by lighting
the units digit and the tens digit in turn, fast enough that the eye sees
both at once.

The logic chain is:

```
bin ──► bin2bcd ──► units, tens ──► digit_scanner ──► digit, select ──► bcd2sevenseg ──► seven_segment[6:0]
                                      (clocked)                             (combinational)   digit_selection_out (C)
```

The heart of it is `bcd2sevenseg`, a 16-entry lookup from a 4-bit BCD code
to a segment pattern. It follows a classic introductory FPGA lab design: a
4-bit BCD decoder with a digit-select bit carried straight through. The lab
exercise built on it converts a binary number to BCD and alternates the
digits on the display. The binary-to-BCD method, the clocked alternation and
the sizes are this design's own choices. They are listed below.

## Segment code

A pattern is 7 bits ordered `g f e d c b a`: bit 6 is segment g and bit 0 is
segment a. A 1 lights the segment. The segment positions are the usual ones:

```
   aaa
  f   b
  f   b
   ggg
  e   c
  e   c
   ddd
```

| BCD | pattern (g..a) | BCD | pattern (g..a) |
|-----|----------------|-----|----------------|
| 0   | 0111111        | 5   | 1101101        |
| 1   | 0000110        | 6   | 1111101        |
| 2   | 1011011        | 7   | 0000111        |
| 3   | 1001111        | 8   | 1111111        |
| 4   | 1100110        | 9   | 1101111        |

The six codes 10 to 15 are not decimal digits. They show a dash (`1000000`,
segment g alone), so a bad code shows up on the display instead of passing
for a digit. The patterns are a 10-entry constant table inside
`bcd2sevenseg`. A synthesis tool
infers the decoder as a 16 x 7 ROM, or as one 4-input LUT per segment.

## Alternating the digits (`digit_scanner`)

This is the only clocked block. A counter counts `REFRESH_CYCLES` clock
cycles and then toggles which digit is shown:

* The units digit (`digits[0]`) is shown with the select line at level
  `UNITS_SEL`.
* The tens digit (`digits[1]`) is shown with the select line at the other
  level.

The digit value and the select level change in the same clock edge, so a
digit's pattern never appears on the other digit's position. After reset the
units digit is shown first. The default of 100,000 cycles gives 1 ms per
digit at a 100 MHz clock: each digit is lit 500 times a second, well above
visible flicker.

On the module, line C reaches the two digits' common pins through different
paths, one per digit. Which level of C lights the left digit and which the
right depends on the board. `UNITS_SEL` (default 0) sets it. If the digits
come out swapped on your hardware, flip `UNITS_SEL`.

The digit picked by the scanner is not registered. A change of the input
number therefore shows at once on the digit currently lit. Only the choice
of digit waits for the counter.

## Binary to BCD (`bin2bcd`)

This block is combinational shift-and-add-3 ("double dabble"). The binary
number is shifted into a row of BCD digits one bit at a time, MSB first.
Before each shift, every digit that holds 5 or more gets 3 added. The shift
doubles the digit, and the +3 makes a digit of 5 or more carry into the next
decimal digit, as it should. The loop is unrolled at elaboration time into a
chain of small compare-and-add stages.

* `BIN_W` is the input width. The default is 4, which gives 0 to 15.
* `NDIG` is the number of digits brought out.

Internally the block always computes every digit the input can need
(`BIN_W/3 + 1`). If a digit above `NDIG` is non-zero, `overflow` is set and
the lowest `NDIG` digits are still output. With the top's defaults (4 bits,
2 digits) overflow cannot happen. Widen `bin` to 7 bits or more and the top's
`overflow` port tells you when the number (above 99) no longer fits on the
display.

## Top level (`ssd_display_top`)

| port                  | dir | width   | meaning                                        |
|-----------------------|-----|---------|------------------------------------------------|
| `clk`                 | in  | 1       | clock for the digit alternation                |
| `rst_n`               | in  | 1       | synchronous reset, active low                  |
| `bin`                 | in  | `BIN_W` | number to show                                 |
| `seven_segment`       | out | 7       | segment lines, bit 0 = A ... bit 6 = G, 1 = on |
| `digit_selection_out` | out | 1       | digit-select line C                            |
| `overflow`            | out | 1       | number needs more than two decimal digits      |

| parameter        | default | meaning                                |
|------------------|---------|----------------------------------------|
| `BIN_W`          | 4       | width of `bin`                         |
| `REFRESH_CYCLES` | 100000  | clock cycles each digit stays lit      |
| `UNITS_SEL`      | 0       | level of C that lights the units digit |

Values below 10 show a leading 0 on the tens digit.

### Wiring to the display module

The module plugs into two 6-pin headers. Pins 5 and 6 of each header are
ground and supply.

| signal             | module pin | header pin | example Zynq-7020 pin (JA/JB Pmod ports) |
|--------------------|------------|------------|------------------------------------------|
| `seven_segment[0]` | AA         | J1-1       | Y11 (JA1)                                |
| `seven_segment[1]` | AB         | J1-2       | AA11 (JA2)                               |
| `seven_segment[2]` | AC         | J1-3       | Y10 (JA3)                                |
| `seven_segment[3]` | AD         | J1-4       | AA9 (JA4)                                |
| `seven_segment[4]` | AE         | J2-1       | W12 (JB1)                                |
| `seven_segment[5]` | AF         | J2-2       | W11 (JB2)                                |
| `seven_segment[6]` | AG         | J2-3       | V10 (JB3)                                |
| `digit_selection_out` | C       | J2-4       | W8 (JB4)                                 |

All of these are 3.3 V LVCMOS outputs. On that board the slide switches at
F21, H22, G22 and F22 suit `bin[3:0]`. The clock and reset pins are not
given here: use the board's own.

## What comes from the lab design and what does not

The following come from the lab design:

* the segment bit order;
* the ten digit patterns and the dash for codes 10 to 15;
* the pass-through of the digit-select bit;
* the port names of the decoder;
* the two-digit module with one select line, and the rule that only one digit
  is lit at a time;
* the task itself: convert binary to BCD and alternate the digit shown.

The following are this design's own choices:

* the shift-and-add-3 converter and its `overflow` flag;
* driving the alternation from a clock, with its refresh period, reset
  behaviour and `UNITS_SEL` polarity;
* the 4-bit default input width, chosen to match four slide switches;
* showing a leading zero.

In the lab design itself the decoder is purely combinational, and the
digit-select bit comes from a switch.

## Testbenches

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs. Expected segment patterns are built from the letters
each digit lights (for example "bc" for 1), not copied from the decoder.

| testbench                      | what it checks |
|--------------------------------|----------------|
| `tb_bcd2sevenseg`              | all 16 codes with both select levels |
| `tb_bcd2sevenseg_lab_sequence` | the reference stimulus: BCD 1, 4 (select high), 9, 11 (select low), 20 ns each, three loops; expects 0000110, 1100110, 1101111, 1000000 |
| `tb_bin2bcd`                   | exhaustive, against division by 10, at 4 bits / 2 digits, 10 bits / 4 digits, and 8 bits / 2 digits where values of 100 and above must set overflow |
| `tb_digit_scanner`             | cycle-by-cycle against a reference model, with refresh periods of 5 and 1 and both polarities; random digit changes; reset in mid-run |
| `tb_ssd_display_top`           | end to end with short refresh periods. Every input value of a 4-bit and an 8-bit copy of the top; every cycle the segments are read back to a digit and checked against the select level. It also checks that the units digit, the tens digit, a non-zero tens digit, a digit swap and overflow each occur at least once |
| `tb_ssd_display_full`          | the top at its default parameters for 600,000 cycles; every turn must last exactly 100,000 cycles |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall \
  rtl/ssd_pkg.sv rtl/bin2bcd.sv rtl/digit_scanner.sv rtl/bcd2sevenseg.sv \
  rtl/ssd_display_top.sv tb/tb_ssd_display_top.sv \
  --top-module tb_ssd_display_top -o sim
./obj_dir/sim
```

For a block testbench, list `rtl/ssd_pkg.sv`, the block's own file and the
testbench. The full-size run takes about a second.

## Files

* `rtl/ssd_pkg.sv`: BCD digit and segment pattern types.
* `rtl/bcd2sevenseg.sv`: BCD to seven-segment decoder with select pass-through.
* `rtl/bin2bcd.sv`: binary to BCD converter.
* `rtl/digit_scanner.sv`: two-digit time multiplexer.
* `rtl/ssd_display_top.sv`: the complete display driver.
