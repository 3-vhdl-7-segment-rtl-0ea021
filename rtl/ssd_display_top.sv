// ssd_display_top: shows an unsigned binary number in decimal on a two-digit
// seven-segment display module.
//
// Data path: bin2bcd turns the binary input into a units and a tens BCD
// digit; digit_scanner lights the two digits in turn, picking the digit to
// show and the level of the display's digit-select line; bcd2sevenseg turns
// the picked digit into its segment pattern and passes the select level
// through, so that its two outputs are exactly the pins of the display
// module: seven shared segment lines and one select line.
//
// Ports:
//   clk, rst_n           clock, active-low synchronous reset
//   bin [BIN_W-1:0]      number to show (for example from slide switches)
//   seven_segment [6:0]  segment lines, bit 6 = g ... bit 0 = a, 1 = lit
//   digit_selection_out  digit-select line of the display module
//   overflow             the number does not fit in two decimal digits;
//                        the display then shows its last two digits
//
// Timing: the segment lines and the select line change together, once every
// REFRESH_CYCLES clock cycles (digit swap) and whenever `bin` changes
// (combinational path from `bin` through the converter and decoder).
//
// The conversion to BCD, the alternation between the two digits and the
// decoder come from the lab exercise; the clocked refresh, the default 4-bit
// input width (four slide switches) and the overflow flag are this design's
// own choices.
module ssd_display_top
  import ssd_pkg::bcd_t;
  import ssd_pkg::seg7_t;
#(
  parameter int unsigned BIN_W          = 4,
  parameter int unsigned REFRESH_CYCLES = 100_000,
  parameter logic        UNITS_SEL      = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BIN_W-1:0] bin,
  output seg7_t            seven_segment,
  output logic             digit_selection_out,
  output logic             overflow
);

  bcd_t [1:0] digits;
  bcd_t       bcd_shown;
  logic       sel;

  bin2bcd #(
    .BIN_W (BIN_W),
    .NDIG  (2)
  ) u_bin2bcd (
    .bin      (bin),
    .bcd      (digits),
    .overflow (overflow)
  );

  digit_scanner #(
    .REFRESH_CYCLES (REFRESH_CYCLES),
    .UNITS_SEL      (UNITS_SEL)
  ) u_scanner (
    .clk       (clk),
    .rst_n     (rst_n),
    .digits    (digits),
    .bcd_out   (bcd_shown),
    .digit_sel (sel)
  );

  bcd2sevenseg u_decoder (
    .bcd                 (bcd_shown),
    .digit_selection_in  (sel),
    .seven_segment       (seven_segment),
    .digit_selection_out (digit_selection_out)
  );

endmodule
