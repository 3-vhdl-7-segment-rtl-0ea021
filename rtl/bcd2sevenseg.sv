// bcd2sevenseg: BCD digit to seven-segment pattern decoder with digit-select
// pass-through.
//
// Purely combinational. The 4-bit BCD code on `bcd` is turned into the
// segment pattern {g,f,e,d,c,b,a} on `seven_segment` (1 = segment lit). Codes
// 0..9 give the usual decimal digits; the six unused codes 10..15 show a dash
// (segment g alone), so a wrong code is visible on the display rather than
// silently shown as a digit. The digit-select bit is carried through unchanged
// from `digit_selection_in` to `digit_selection_out`, so that one block
// drives every pin of a two-digit display module: seven shared segment lines
// plus the line that chooses which of the two digits is lit.
//
// Ports:
//   bcd                  in  [3:0]  BCD code
//   digit_selection_in   in         which digit is to be lit
//   seven_segment        out [6:0]  segment pattern, bit 6 = g ... bit 0 = a
//   digit_selection_out  out        copy of digit_selection_in
//
// Timing: no clock, no state; outputs follow the inputs after the gate delay
// of a 4-input function per segment.
//
// The segment ordering, the ten digit patterns, the dash for unused codes and
// the pass-through of the select line are those of the lab design this block
// implements; writing the table as a constant ROM with a range check is this
// design's own.
module bcd2sevenseg
  import ssd_pkg::bcd_t;
  import ssd_pkg::seg7_t;
(
  input  bcd_t  bcd,
  input  logic  digit_selection_in,
  output seg7_t seven_segment,
  output logic  digit_selection_out
);

  // Segment patterns of the digits 0..9, indexed by the BCD code.
  localparam seg7_t DIGIT_SEG [10] = '{
    7'b0111111,  // 0
    7'b0000110,  // 1
    7'b1011011,  // 2
    7'b1001111,  // 3
    7'b1100110,  // 4
    7'b1101101,  // 5
    7'b1111101,  // 6
    7'b0000111,  // 7
    7'b1111111,  // 8
    7'b1101111   // 9
  };
  localparam seg7_t DASH = 7'b1000000;  // segment g alone

  always_comb begin
    if (bcd <= 4'd9) seven_segment = DIGIT_SEG[bcd];
    else             seven_segment = DASH;
  end

  assign digit_selection_out = digit_selection_in;

endmodule
