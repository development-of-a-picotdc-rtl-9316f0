// tb_liroc_analog_setup: drives the analog-probe setup slave over its
// IPbus port with two shift-register models attached (LIROC A and B).
// For a set of probe positions, on A alone, B alone and both together,
// it checks: the start bits read back 1 while busy and clear at the end;
// one reset pulse of at least two divided periods; exactly 256 sr_clk
// rising edges to each selected chip and none to an unselected one; the
// sr_clk period (2**DIV_BITS system clocks); the model then holds a single
// 1 at the requested stage; the readback register equals the position.
// Default parameters (625 kHz shift clock from 40 MHz).
module tb_liroc_analog_setup;
  import ipbus_pkg::*;
  localparam int DIV = 64;
  logic clk = 0, rst = 1;
  ipb_wbus_t ipb_in = '{default: '0};
  ipb_rbus_t ipb_out;
  logic [1:0] sr_clk, sr_rst, srin, srout;
  int checks = 0, failures = 0;

  liroc_analog_setup dut (.clk, .rst, .ipb_in, .ipb_out, .sr_clk, .sr_rst, .srin, .srout);
  liroc_probe_model u_a (.sr_clk(sr_clk[0]), .sr_rst(sr_rst[0]), .srin(srin[0]), .srout(srout[0]));
  liroc_probe_model u_b (.sr_clk(sr_clk[1]), .sr_rst(sr_rst[1]), .srin(srin[1]), .srout(srout[1]));

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic ipb_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: d, write: 1'b1, strobe: 1'b1};
    @(negedge clk);
    ipb_in = '{default: '0};
  endtask
  task automatic ipb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    ipb_in = '{addr: a, wdata: '0, write: 1'b0, strobe: 1'b1};
    #1 d = ipb_out.rdata;
    @(negedge clk);
    ipb_in = '{default: '0};
  endtask

  // sr_clk period and reset length monitors
  int last_rise[2], min_per[2], max_per[2], rst_len[2], min_rst[2], cyc = 0;
  always @(posedge clk) begin
    cyc++;
    for (int c = 0; c < 2; c++) begin
      if (sr_rst[c] && !rst) rst_len[c]++;
      else if (rst_len[c] != 0) begin
        if (rst_len[c] < min_rst[c]) min_rst[c] = rst_len[c];
        rst_len[c] = 0;
      end
    end
  end
  always @(posedge sr_clk[0]) begin
    if (last_rise[0] != 0) begin
      if (cyc - last_rise[0] < min_per[0]) min_per[0] = cyc - last_rise[0];
      if (cyc - last_rise[0] > max_per[0] && cyc - last_rise[0] <= 2 * DIV) max_per[0] = cyc - last_rise[0];
    end
    last_rise[0] = cyc;
  end

  task automatic run(input bit do_a, input bit do_b, input int pa, input int pb);
    logic [31:0] d;
    int ca0 = u_a.n_clk, cb0 = u_b.n_clk, ra0 = u_a.n_rst, rb0 = u_b.n_rst;
    ipb_write(0, {do_b, do_a, 14'd0, 8'(pb), 8'(pa)});
    ipb_read(0, d);
    check(d[31:30] == {do_b, do_a} && d[6:0] == 7'(pa) && d[14:8] == 7'(pb),
          $sformatf("setup register read back %h", d));
    do begin
      repeat (200) @(posedge clk);
      ipb_read(0, d);
    end while (d[31:30] != 2'b00);
    if (do_a) begin
      check(u_a.n_clk - ca0 == 256 && u_a.n_rst - ra0 == 1,
            $sformatf("A: %0d clocks, %0d resets", u_a.n_clk - ca0, u_a.n_rst - ra0));
      check(u_a.ones() == 1 && u_a.sr[pa], $sformatf("A holds one 1 at stage %0d", pa));
      ipb_read(1, d);
      check(d == 32'(pa), $sformatf("A readback %0d, expected %0d", d, pa));
    end else begin
      check(u_a.n_clk == ca0 && u_a.n_rst == ra0, "A untouched");
    end
    if (do_b) begin
      check(u_b.n_clk - cb0 == 256 && u_b.n_rst - rb0 == 1,
            $sformatf("B: %0d clocks, %0d resets", u_b.n_clk - cb0, u_b.n_rst - rb0));
      check(u_b.ones() == 1 && u_b.sr[pb], $sformatf("B holds one 1 at stage %0d", pb));
      ipb_read(2, d);
      check(d == 32'(pb), $sformatf("B readback %0d, expected %0d", d, pb));
    end else begin
      check(u_b.n_clk == cb0 && u_b.n_rst == rb0, "B untouched");
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin min_per[c] = 1 << 30; max_per[c] = 0; min_rst[c] = 1 << 30; end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    run(1, 0, 0, 0);
    run(1, 0, 127, 0);
    run(0, 1, 0, 5);
    run(1, 1, 64, 1);
    run(1, 1, 126, 37);
    for (int i = 0; i < 4; i++) run(1, 1, $urandom_range(127), $urandom_range(127));
    check(min_per[0] == DIV && max_per[0] == DIV, $sformatf("sr_clk period %0d..%0d", min_per[0], max_per[0]));
    check(min_rst[0] >= 2 * DIV && min_rst[1] >= 2 * DIV, $sformatf("reset length %0d / %0d", min_rst[0], min_rst[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
