// tb_bcd2sevenseg: exhaustive self-checking test of the BCD to seven-segment
// decoder.
//
// Every one of the 16 input codes is applied with both levels of the
// digit-select input. The expected pattern is built independently from the
// segment letters each digit lights on a standard display (for example "bc"
// for 1), bit 0 being segment a and bit 6 segment g; the six codes above 9
// must show the dash (segment g alone). The select output must equal the
// select input. Pure combinational block: results are sampled 1 ns after each
// change.
module tb_bcd2sevenseg;
  import ssd_pkg::*;

  bcd_t  bcd;
  logic  sel_in;
  seg7_t seg;
  logic  sel_out;

  int checks = 0;
  int failures = 0;

  bcd2sevenseg dut (
    .bcd                 (bcd),
    .digit_selection_in  (sel_in),
    .seven_segment       (seg),
    .digit_selection_out (sel_out)
  );

  function automatic seg7_t from_letters(string s);
    seg7_t v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return v;
  endfunction

  function automatic seg7_t expected(int code);
    case (code)
      0: return from_letters("abcdef");
      1: return from_letters("bc");
      2: return from_letters("abdeg");
      3: return from_letters("abcdg");
      4: return from_letters("bcfg");
      5: return from_letters("acdfg");
      6: return from_letters("acdefg");
      7: return from_letters("abc");
      8: return from_letters("abcdefg");
      9: return from_letters("abcdfg");
      default: return from_letters("g");
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 16; c++) begin
        bcd    = bcd_t'(c);
        sel_in = s[0];
        #1;
        checks++;
        if (seg !== expected(c)) begin
          failures++;
          $display("FAIL bcd=%0d seg=%b expected=%b", c, seg, expected(c));
        end
        checks++;
        if (sel_out !== sel_in) begin
          failures++;
          $display("FAIL select passthrough in=%b out=%b", sel_in, sel_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
