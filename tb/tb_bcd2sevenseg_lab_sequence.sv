// tb_bcd2sevenseg_lab_sequence: replays the reference stimulus of the BCD
// decoder and checks the reference waveform.
//
// The stimulus is the four-step loop used to demonstrate the decoder: BCD 1
// and 4 with the select input high, then BCD 9 and the invalid code 11 with
// the select input low, each held 20 ns, repeated. The outputs expected at
// each step are 0000110, 1100110, 1101111 and 1000000 (the dash for the
// invalid code), with the select output following the select input. The
// loop is run three times and each step is checked in the middle of its
// 20 ns window.
module tb_bcd2sevenseg_lab_sequence;
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

  localparam bcd_t  STIM_BCD [4] = '{4'b0001, 4'b0100, 4'b1001, 4'b1011};
  localparam logic  STIM_SEL [4] = '{1'b1, 1'b1, 1'b0, 1'b0};
  localparam seg7_t EXP_SEG  [4] = '{7'b0000110, 7'b1100110, 7'b1101111, 7'b1000000};

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int loop = 0; loop < 3; loop++) begin
      for (int step = 0; step < 4; step++) begin
        bcd    = STIM_BCD[step];
        sel_in = STIM_SEL[step];
        #10ns;
        checks++;
        if (seg !== EXP_SEG[step] || sel_out !== STIM_SEL[step]) begin
          failures++;
          $display("FAIL t=%0t bcd=%b seg=%b expected %b sel_out=%b", $time, bcd, seg,
                   EXP_SEG[step], sel_out);
        end
        #10ns;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
