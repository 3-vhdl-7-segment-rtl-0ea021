// digit_scanner: time-multiplexes two BCD digits onto one shared segment bus.
//
// A two-digit display module of this kind has one set of seven segment lines
// shared by both digits and a single select line that chooses which digit is
// lit; only one digit can be lit at any moment. To show a two-digit number
// both digits are lit in turn, fast enough that the eye sees them together.
// This block holds a cycle counter that wraps every REFRESH_CYCLES clock
// cycles; at each wrap it toggles which digit is shown. While the units digit
// (digit 0) is shown, `bcd_out` carries digits[0] and `digit_sel` is at level
// UNITS_SEL; while the tens digit is shown, `bcd_out` carries digits[1] and
// `digit_sel` is at the other level. The digit value and the select level
// change in the same cycle, so a pattern is never shown on the wrong digit.
//
// Ports:
//   clk, rst_n      clock, active-low synchronous reset
//   digits [1:0]    BCD digits to show, [0] = units, [1] = tens
//   bcd_out         the digit shown now
//   digit_sel       select line level for the digit shown now
//
// Timing: after reset the units digit is shown for REFRESH_CYCLES cycles,
// then the tens digit for REFRESH_CYCLES cycles, and so on. `bcd_out` is the
// combinational pick of the current digit, so a change of `digits` shows at
// once on the digit being lit. The default of 100,000 cycles is 1 ms per
// digit at 100 MHz, a 500 Hz refresh of the whole display.
//
// That the two digits take turns and that only one is lit at a time comes
// from the lab; the refresh period, the reset behaviour and which select
// level means which digit are this design's own choices.
module digit_scanner
  import ssd_pkg::bcd_t;
#(
  parameter int unsigned REFRESH_CYCLES = 100_000,  // cycles each digit stays lit
  parameter logic        UNITS_SEL      = 1'b0      // select level that lights digit 0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  bcd_t [1:0]     digits,
  output bcd_t           bcd_out,
  output logic           digit_sel
);

  localparam int unsigned CNT_W = (REFRESH_CYCLES > 1) ? $clog2(REFRESH_CYCLES) : 1;

  logic [CNT_W-1:0] cnt;
  logic             cur;   // index of the digit being shown
  logic             swap;  // last cycle of the current digit's turn

  assign swap = (cnt == CNT_W'(REFRESH_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      cur <= 1'b0;
    end else if (swap) begin
      cnt <= '0;
      cur <= ~cur;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign bcd_out   = digits[cur];
  assign digit_sel = cur ? ~UNITS_SEL : UNITS_SEL;

  initial begin
    assert (REFRESH_CYCLES >= 1) else $error("REFRESH_CYCLES must be at least 1");
  end

endmodule
