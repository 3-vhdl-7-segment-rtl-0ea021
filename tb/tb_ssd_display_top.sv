// tb_ssd_display_top: end-to-end test of the two-digit decimal display.
//
// Two copies of the top run side by side with short refresh periods so the
// test stays short: A at the default 4-bit input width (refresh period 3
// cycles) and B with an 8-bit input (period 2 cycles), which can exceed two
// decimal digits. Every value of each input is held for several refresh
// periods. Every cycle the testbench reads the segment lines back into a
// digit, using its own map from segment letters to digits, and checks that
// it is the units digit of the input while the select line is at the units
// level and the tens digit otherwise; it also checks the overflow output.
// Mechanisms counted, each of which must occur: units digit shown, tens digit
// shown, a non-zero tens digit shown, a digit swap on the select line, and
// (instance B) overflow.
module tb_ssd_display_top;
  import ssd_pkg::*;

  logic       clk;
  logic       rst_n;
  logic [3:0] bin_a;
  logic [7:0] bin_b;
  seg7_t      seg_a, seg_b;
  logic       sel_a, sel_b, ovf_a, ovf_b;

  int checks = 0;
  int failures = 0;
  int n_units = 0, n_tens = 0, n_tens_nonzero = 0, n_swap = 0, n_ovf = 0;
  logic prev_sel_a;

  ssd_display_top #(.REFRESH_CYCLES(3)) dut_a (
    .clk(clk), .rst_n(rst_n), .bin(bin_a),
    .seven_segment(seg_a), .digit_selection_out(sel_a), .overflow(ovf_a)
  );
  ssd_display_top #(.BIN_W(8), .REFRESH_CYCLES(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .bin(bin_b),
    .seven_segment(seg_b), .digit_selection_out(sel_b), .overflow(ovf_b)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic seg7_t from_letters(string s);
    seg7_t v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return v;
  endfunction

  // Digit shown by a segment pattern, -1 if it is no digit.
  function automatic int read_digit(seg7_t s);
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    for (int d = 0; d < 10; d++) if (s == from_letters(lit[d])) return d;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_a();
    int exp_d;
    exp_d = (sel_a == 1'b0) ? int'(bin_a) % 10 : int'(bin_a) / 10;
    checks++;
    if (read_digit(seg_a) != exp_d || ovf_a !== 1'b0) begin
      failures++;
      $display("FAIL A bin=%0d sel=%b seg=%b read %0d expected %0d", bin_a, sel_a, seg_a,
               read_digit(seg_a), exp_d);
    end
    if (sel_a == 1'b0) n_units++;
    else begin
      n_tens++;
      if (exp_d != 0) n_tens_nonzero++;
    end
    if (sel_a != prev_sel_a) n_swap++;
    prev_sel_a = sel_a;
  endtask

  task automatic check_b();
    int exp_d;
    exp_d = (sel_b == 1'b0) ? int'(bin_b) % 10 : (int'(bin_b) / 10) % 10;
    checks++;
    if (read_digit(seg_b) != exp_d || ovf_b !== (bin_b >= 8'd100)) begin
      failures++;
      $display("FAIL B bin=%0d sel=%b seg=%b read %0d expected %0d ovf=%b", bin_b, sel_b, seg_b,
               read_digit(seg_b), exp_d, ovf_b);
    end
    if (ovf_b) n_ovf++;
  endtask

  initial begin
    rst_n = 1'b0;
    bin_a = '0;
    bin_b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_sel_a = sel_a;
    for (int v = 0; v < 256; v++) begin
      bin_a = 4'(v);
      bin_b = 8'(v);
      for (int c = 0; c < 7; c++) begin
        #2 check_a();
        check_b();
        @(posedge clk);
        #1;
      end
    end
    checks++; if (n_units == 0)        begin failures++; $display("FAIL units digit never shown"); end
    checks++; if (n_tens == 0)         begin failures++; $display("FAIL tens digit never shown"); end
    checks++; if (n_tens_nonzero == 0) begin failures++; $display("FAIL non-zero tens never shown"); end
    checks++; if (n_swap == 0)         begin failures++; $display("FAIL digit swap never happened"); end
    checks++; if (n_ovf == 0)          begin failures++; $display("FAIL overflow never happened"); end
    $display("units=%0d tens=%0d tens_nonzero=%0d swaps=%0d overflow=%0d",
             n_units, n_tens, n_tens_nonzero, n_swap, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
