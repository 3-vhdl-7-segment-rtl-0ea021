// tb_digit_scanner: self-checking test of the two-digit scanner.
//
// Run with a refresh period of 5 cycles. A cycle-level reference keeps its
// own counter and digit index and is compared with the block every cycle:
// the digit shown must be digits[0] with the select line at UNITS_SEL, or
// digits[1] with the other level, and the turn must change exactly every 5
// cycles after reset. The digits are changed at random while the scanner
// runs, and a mid-run reset must return it to the units digit. A second
// instance with a period of 1 cycle and UNITS_SEL = 1 checks the other
// polarity and the shortest period.
module tb_digit_scanner;
  import ssd_pkg::*;

  localparam int unsigned P = 5;

  logic       clk;
  logic       rst_n;
  bcd_t [1:0] digits;
  bcd_t       bcd_out, bcd_out1;
  logic       sel, sel1;

  int checks = 0;
  int failures = 0;
  int swaps;
  int ref_cnt, ref_cur, ref_cur1;

  digit_scanner #(.REFRESH_CYCLES(P)) dut (
    .clk(clk), .rst_n(rst_n), .digits(digits), .bcd_out(bcd_out), .digit_sel(sel)
  );
  digit_scanner #(.REFRESH_CYCLES(1), .UNITS_SEL(1'b1)) dut1 (
    .clk(clk), .rst_n(rst_n), .digits(digits), .bcd_out(bcd_out1), .digit_sel(sel1)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (bcd_out !== digits[ref_cur] || sel !== ref_cur[0]) begin
      failures++;
      $display("FAIL t=%0t shown=%0d sel=%b expected digit %0d (%0d) sel %b",
               $time, bcd_out, sel, ref_cur, digits[ref_cur], ref_cur[0]);
    end
    checks++;
    if (bcd_out1 !== digits[ref_cur1] || sel1 !== ~ref_cur1[0]) begin
      failures++;
      $display("FAIL t=%0t period-1 instance shown=%0d sel=%b expected digit %0d",
               $time, bcd_out1, sel1, ref_cur1);
    end
  endtask

  // Reference model, advanced on each rising edge.
  always @(posedge clk) begin
    if (!rst_n) begin
      ref_cnt  <= 0;
      ref_cur  <= 0;
      ref_cur1 <= 0;
      swaps    <= 0;
    end else begin
      ref_cur1 <= 1 - ref_cur1;
      if (ref_cnt == P - 1) begin
        ref_cnt <= 0;
        ref_cur <= 1 - ref_cur;
        swaps   <= swaps + 1;
      end else begin
        ref_cnt <= ref_cnt + 1;
      end
    end
  end

  initial begin
    rst_n  = 1'b0;
    digits = '{4'd3, 4'd7};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      #3 compare();
      if (i % 7 == 3) begin
        digits[0] = bcd_t'($urandom_range(9));
        digits[1] = bcd_t'($urandom_range(9));
        #1 compare();
      end
      if (i == 120) begin
        rst_n = 1'b0;
        @(posedge clk);
        #1 rst_n = 1'b1;
        #1 compare();
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (swaps < 15) begin  // swaps since the mid-run reset
      failures++;
      $display("FAIL only %0d digit swaps since reset", swaps);
    end
    $display("swaps=%0d", swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
