// tb_clk_divider: the divided clock of the default 6-bit divider must have
// a period of 64 input clocks (625 kHz from 40 MHz) and 50 % duty, and the
// rise/fall ticks must come exactly one input clock before each edge.
module tb_clk_divider;
  logic clk = 0, rst = 1, clk_out, rise_tick, fall_tick;
  int checks = 0, failures = 0;

  clk_divider dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int t_high, t_low, last_rise;
    logic prev, prev_rt, prev_ft;
    repeat (2) @(posedge clk);
    rst = 0;
    prev = clk_out; prev_rt = 0; prev_ft = 0;
    last_rise = -1; t_high = 0; t_low = 0;
    for (int c = 0; c < 64 * 10; c++) begin
      @(posedge clk); #1;
      if (clk_out && !prev) begin
        check(prev_rt, "rise tick one cycle before rising edge");
        if (last_rise >= 0) check(c - last_rise == 64, $sformatf("period %0d", c - last_rise));
        last_rise = c;
      end
      if (!clk_out && prev) check(prev_ft, "fall tick one cycle before falling edge");
      if (c >= 64) begin t_high += clk_out; t_low += !clk_out; end
      check(!(rise_tick && fall_tick), "ticks exclusive");
      prev = clk_out; prev_rt = rise_tick; prev_ft = fall_tick;
    end
    check(t_high == t_low, $sformatf("duty %0d/%0d", t_high, t_low));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
