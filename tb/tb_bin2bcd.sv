// tb_bin2bcd: self-checking test of the binary to BCD converter.
//
// Three instances are checked exhaustively against digits computed with
// division and remainder by 10: the default size (4-bit input, two digits),
// a 10-bit input with four digits (no overflow possible) and an 8-bit input
// with only two digits, where values of 100 and above must raise overflow
// and still show their last two digits.
module tb_bin2bcd;
  import ssd_pkg::*;

  logic [3:0]  bin_a;
  bcd_t [1:0]  bcd_a;
  logic        ovf_a;
  logic [9:0]  bin_b;
  bcd_t [3:0]  bcd_b;
  logic        ovf_b;
  logic [7:0]  bin_c;
  bcd_t [1:0]  bcd_c;
  logic        ovf_c;

  int checks = 0;
  int failures = 0;
  int overflows_seen = 0;

  bin2bcd dut_a (.bin(bin_a), .bcd(bcd_a), .overflow(ovf_a));
  bin2bcd #(.BIN_W(10), .NDIG(4)) dut_b (.bin(bin_b), .bcd(bcd_b), .overflow(ovf_b));
  bin2bcd #(.BIN_W(8),  .NDIG(2)) dut_c (.bin(bin_c), .bcd(bcd_c), .overflow(ovf_c));

  function automatic int digit_of(int v, int d);
    for (int i = 0; i < d; i++) v = v / 10;
    return v % 10;
  endfunction

  task automatic check(string tag, int v, int d, int got);
    checks++;
    if (got != digit_of(v, d)) begin
      failures++;
      $display("FAIL %s value=%0d digit %0d got %0d expected %0d", tag, v, d, got, digit_of(v, d));
    end
  endtask

  task automatic check_ovf(string tag, int v, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s value=%0d overflow=%b expected %b", tag, v, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bin_a = 4'(v);
      #1;
      for (int d = 0; d < 2; d++) check("4b", v, d, int'(bcd_a[d]));
      check_ovf("4b", v, ovf_a, 1'b0);
    end
    for (int v = 0; v < 1024; v++) begin
      bin_b = 10'(v);
      #1;
      for (int d = 0; d < 4; d++) check("10b", v, d, int'(bcd_b[d]));
      check_ovf("10b", v, ovf_b, 1'b0);
    end
    for (int v = 0; v < 256; v++) begin
      bin_c = 8'(v);
      #1;
      for (int d = 0; d < 2; d++) check("8b", v, d, int'(bcd_c[d]));
      check_ovf("8b", v, ovf_c, v >= 100);
      if (ovf_c) overflows_seen++;
    end
    checks++;
    if (overflows_seen != 156) begin
      failures++;
      $display("FAIL overflow seen %0d times, expected 156", overflows_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
