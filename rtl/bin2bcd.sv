// bin2bcd: unsigned binary to packed BCD converter (combinational).
//
// Converts the BIN_W-bit unsigned number `bin` into NDIG decimal digits,
// digit 0 being the units, digit 1 the tens and so on. It uses the
// shift-and-add-3 ("double dabble") method: the binary number is shifted
// into a BCD register one bit at a time, most significant bit first, and
// before each shift every BCD digit that holds 5 or more has 3 added, so that
// the shift (a doubling) carries correctly into the next decimal digit. The
// loop is fully unrolled, so the result is a network of small adders and
// comparators with no clock.
//
// If the number needs more than NDIG digits, `overflow` is set and `bcd`
// holds the lowest NDIG digits. With the default sizes (4-bit input, two
// digits, largest value 15) overflow cannot occur.
//
// Ports:
//   bin       in  [BIN_W-1:0]      unsigned binary value
//   bcd       out [NDIG-1:0][3:0]  BCD digits, [0] = units
//   overflow  out                  value has more than NDIG decimal digits
//
// The conversion itself is what the lab exercise asks for; the method, the
// widths and the overflow flag are this design's own choices.
module bin2bcd
  import ssd_pkg::bcd_t;
#(
  parameter int unsigned BIN_W = 4,   // width of the binary input
  parameter int unsigned NDIG  = 2    // BCD digits brought out
) (
  input  logic [BIN_W-1:0]  bin,
  output bcd_t [NDIG-1:0]   bcd,
  output logic              overflow
);

  // Digits that any BIN_W-bit value can need: 2^BIN_W < 10^(BIN_W/3 + 1).
  localparam int unsigned NFULL = BIN_W / 3 + 1;
  localparam int unsigned NI    = (NFULL > NDIG) ? NFULL : NDIG;

  // Shift register of NI BCD digits; digit d sits in bits [4d+3:4d].
  logic [4*NI-1:0] work;

  always_comb begin
    work = '0;
    for (int i = BIN_W - 1; i >= 0; i--) begin
      for (int d = 0; d < NI; d++) begin
        if (work[4*d +: 4] >= 4'd5) work[4*d +: 4] = work[4*d +: 4] + 4'd3;
      end
      work = {work[4*NI-2:0], bin[i]};
    end
  end

  always_comb begin
    for (int d = 0; d < NDIG; d++) bcd[d] = work[4*d +: 4];
    overflow = 1'b0;
    for (int d = NDIG; d < NI; d++) begin
      if (work[4*d +: 4] != 4'd0) overflow = 1'b1;
    end
  end

endmodule
