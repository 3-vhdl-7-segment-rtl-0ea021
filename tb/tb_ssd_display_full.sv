// tb_ssd_display_full: the display top at its default sizes (4-bit input,
// 100,000 cycles per digit) taken through complete refresh cycles.
//
// The value 13 is shown for two full refresh cycles (400,000 clock cycles),
// then 7 for one. Every cycle the segment lines are read back into a digit
// and compared with the units digit (select line low) or the tens digit
// (select line high). The cycle of every change of the select line is
// recorded and each turn must last exactly 100,000 cycles.
module tb_ssd_display_full;
  import ssd_pkg::*;

  localparam int PERIOD = 100_000;

  logic       clk;
  logic       rst_n;
  logic [3:0] bin;
  seg7_t      seg;
  logic       sel, ovf;

  int checks = 0;
  int failures = 0;
  int cycle = 0, last_swap = 0, swaps = 0;
  logic prev_sel;

  ssd_display_top dut (
    .clk(clk), .rst_n(rst_n), .bin(bin),
    .seven_segment(seg), .digit_selection_out(sel), .overflow(ovf)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic seg7_t from_letters(string s);
    seg7_t v = '0;
    for (int i = 0; i < s.len(); i++) v[3'(s[i] - "a")] = 1'b1;
    return v;
  endfunction

  function automatic int read_digit(seg7_t s);
    string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                        "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
    for (int d = 0; d < 10; d++) if (s == from_letters(lit[d])) return d;
    return -1;
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int value, int ncycles);
    int exp_d;
    bin = 4'(value);
    for (int c = 0; c < ncycles; c++) begin
      #2;
      exp_d = (sel == 1'b0) ? value % 10 : value / 10;
      checks++;
      if (read_digit(seg) != exp_d || ovf !== 1'b0) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d value=%0d sel=%b seg=%b", cycle, value, sel, seg);
      end
      if (sel != prev_sel) begin
        swaps++;
        checks++;
        if (cycle - last_swap != PERIOD) begin
          failures++;
          $display("FAIL turn lasted %0d cycles", cycle - last_swap);
        end
        last_swap = cycle;
      end
      prev_sel = sel;
      @(posedge clk);
      cycle++;
      #1;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    bin   = '0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    prev_sel  = sel;
    run(13, 4 * PERIOD);
    run(7, 2 * PERIOD);
    checks++;
    if (swaps != 5) begin
      failures++;
      $display("FAIL %0d swaps, expected 5", swaps);
    end
    $display("swaps=%0d", swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
