// tb_reset_logic: reset stretching. A one-cycle soft reset must hold
// rst_ipb for exactly 32 cycles and leave rst_if alone; a one-cycle nuke
// the reverse; the button must hold both while pressed (asynchronously) and
// for 32 cycles after release.
module tb_reset_logic;
  logic clk = 0, sys_rstn = 1, soft_rst = 0, nuke = 0, rst_ipb, rst_if;
  int checks = 0, failures = 0;

  reset_logic dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pulse_and_measure(input bit which, output int n_ipb, output int n_if);
    n_ipb = 0; n_if = 0;
    @(negedge clk);
    if (which) nuke = 1; else soft_rst = 1;
    @(negedge clk);
    nuke = 0; soft_rst = 0;
    for (int i = 0; i < 60; i++) begin
      n_ipb += rst_ipb;
      n_if  += rst_if;
      @(negedge clk);
    end
  endtask

  initial begin
    int a, b;
    // power-up: counters start at arbitrary values and clear themselves
    repeat (40) @(negedge clk);
    check(!rst_ipb && !rst_if, "resets released after power-up");
    pulse_and_measure(0, a, b);
    check(a == 31, $sformatf("soft reset stretched to %0d cycles after the request cycle", a));
    check(b == 0, "soft reset leaves the interface alone");
    pulse_and_measure(1, a, b);
    check(b == 31, $sformatf("nuke stretched to %0d", b));
    check(a == 0, "nuke leaves the IPbus slaves alone");
    // button
    #3 sys_rstn = 0;
    #1 check(rst_ipb && rst_if, "button asserts both resets at once");
    repeat (10) @(negedge clk);
    check(rst_ipb && rst_if, "held while pressed");
    sys_rstn = 1;
    a = 0;
    for (int i = 0; i < 60; i++) begin a += rst_ipb; @(negedge clk); end
    // the counters also run while the button is held, so the stretch after
    // release is whatever is left to the roll-over: 1 to 32 cycles
    check(a >= 1 && a <= 33, $sformatf("held %0d cycles after release", a));
    check(!rst_ipb && !rst_if, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
