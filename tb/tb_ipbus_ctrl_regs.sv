// tb_ipbus_ctrl_regs: scratch register write/read, status and ID reads,
// and the one-cycle soft-reset and nuke requests from control writes.
module tb_ipbus_ctrl_regs;
  import ipbus_pkg::*;
  logic clk = 0, rst = 1, soft_rst, nuke;
  logic [31:0] status_i = 32'h0000_000A;
  ipb_wbus_t ipb_in = '{addr: '0, wdata: '0, write: 1'b0, strobe: 1'b0};
  ipb_rbus_t ipb_out;
  int checks = 0, failures = 0;
  int n_soft = 0, n_nuke = 0;

  ipbus_ctrl_regs dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) begin n_soft += soft_rst; n_nuke += nuke; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic bus(input bit w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: d, write: w, strobe: 1'b1};
    #1;
    check(ipb_out.ack && !ipb_out.err, "zero-wait ack");
    r = ipb_out.rdata;
    @(negedge clk);
    ipb_in.strobe = 1'b0;
  endtask

  initial begin
    logic [31:0] r;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) begin
      logic [31:0] v;
      v = $urandom;
      bus(1, 2, v, r);
      bus(0, 2, 0, r);
      check(r == v, "scratch read back");
    end
    bus(0, 1, 0, r); check(r == 32'hA, "status");
    bus(0, 3, 0, r); check(r == 32'h5043_5444, "id");
    n_soft = 0; n_nuke = 0;
    bus(1, 0, 32'h1, r);
    repeat (3) @(posedge clk);
    check(n_soft == 1 && n_nuke == 0, $sformatf("soft reset pulse %0d %0d", n_soft, n_nuke));
    bus(1, 0, 32'h2, r);
    repeat (3) @(posedge clk);
    check(n_soft == 1 && n_nuke == 1, "nuke pulse");
    bus(1, 2, 32'h7, r);     // scratch write must not reset
    repeat (3) @(posedge clk);
    check(n_soft == 1 && n_nuke == 1, "no pulse on other registers");
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
