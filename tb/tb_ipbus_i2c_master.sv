// tb_ipbus_i2c_master: the LIROC register access of the host software,
// run through the IPbus registers of the I2C master against a LIROC I2C
// slave model. A register write is three one-byte write frames (address
// low byte, address high byte, data) with device addresses
// {chip ID, frame 0/1/2}; a read is two write frames and a one-byte read
// frame. Checks the written registers in the model, the values read back
// through the RX FIFO, the SCL period set by the prescaler, the ack-error
// status for a wrong chip ID, a 3-byte read into the RX FIFO, and the
// LIROC power-on / reset pins.
module tb_ipbus_i2c_master;
  import ipbus_pkg::*;
  localparam logic [3:0] CHIP = 4'h5;
  logic clk = 0, rst = 1;
  ipb_wbus_t ipb_in = '{addr: '0, wdata: '0, write: 1'b0, strobe: 1'b0};
  ipb_rbus_t ipb_out;
  logic scl_oe, sda_oe, sda_i, power_on, reset_n, sda_pull;
  wire  scl = !scl_oe;
  wire  sda = !(sda_oe || sda_pull);
  assign sda_i = sda;
  int checks = 0, failures = 0;

  ipbus_i2c_master #(.FIFO_DEPTH(16)) dut (.*);
  liroc_i2c_model #(.CHIP_ID(CHIP)) u_liroc (.scl, .sda, .sda_pull);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic bus(input bit w, input logic [2:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    ipb_in = '{addr: {29'h0, a}, wdata: d, write: w, strobe: 1'b1};
    #1 r = ipb_out.rdata;
    @(negedge clk);
    ipb_in.strobe = 1'b0;
  endtask

  task automatic wait_idle();
    logic [31:0] s;
    do bus(0, 6, 0, s); while (s[0]);
  endtask

  function automatic logic [15:0] ladd(input int a, input int sa);
    return {8'(a >> 3), 3'(a), 5'(sa)};
  endfunction

  task automatic frame_write(input int fr, input logic [7:0] b);
    logic [31:0] r;
    bus(1, 1, {CHIP, 3'(fr)}, r);
    bus(1, 4, b, r);
    bus(1, 3, 0, r);
    wait_idle();
  endtask

  task automatic liroc_write(input int a, input int sa, input logic [7:0] v);
    logic [15:0] l = ladd(a, sa);
    frame_write(0, l[7:0]);
    frame_write(1, l[15:8]);
    frame_write(2, v);
  endtask

  task automatic liroc_read(input int a, input int sa, output logic [7:0] v, output bit err);
    logic [15:0] l = ladd(a, sa);
    logic [31:0] r;
    frame_write(0, l[7:0]);
    frame_write(1, l[15:8]);
    bus(1, 1, {CHIP, 3'd2}, r);
    bus(1, 2, 1, r);
    wait_idle();
    bus(0, 6, 0, r);
    err = r[1];
    bus(0, 5, 0, r);
    v = r[7:0];
  endtask

  // SCL period monitor
  realtime t_last = 0, period = 0;
  always @(posedge scl) begin period = $realtime - t_last; t_last = $realtime; end

  initial begin
    logic [31:0] r;
    logic [7:0] v;
    bit err;
    int addrs[6] = '{0, 17, 63, 64, 65, 67};
    int subs[6]  = '{0, 1, 1, 2, 2, 0};
    logic [7:0] vals[6];
    repeat (3) @(posedge clk);
    rst = 0;
    bus(1, 0, {16'd5, 16'd10}, r);        // 10-cycle half period, setup 5
    bus(0, 0, 0, r);
    check(r == {16'd5, 16'd10}, "prescaler read back");
    bus(1, 7, 2'b11, r);
    check(power_on && reset_n, "power-on and reset pins");
    bus(1, 7, 2'b10, r);
    check(power_on && !reset_n, "reset pin low (active low)");
    for (int i = 0; i < 6; i++) begin
      vals[i] = 8'($urandom);
      liroc_write(addrs[i], subs[i], vals[i]);
      check(u_liroc.regs.exists(int'(ladd(addrs[i], subs[i]))) &&
            u_liroc.regs[int'(ladd(addrs[i], subs[i]))] == vals[i],
            $sformatf("model register %0d/%0d written", addrs[i], subs[i]));
    end
    check(period > 19 * 25.0 && period < 21 * 25.0 || period == 20 * 25.0, $sformatf("SCL period %0t", period));
    for (int i = 5; i >= 0; i--) begin
      liroc_read(addrs[i], subs[i], v, err);
      check(!err && v == vals[i], $sformatf("read %0d/%0d = %h exp %h", addrs[i], subs[i], v, vals[i]));
    end
    // three-byte read: same register returned three times
    bus(1, 1, {CHIP, 3'd2}, r);
    bus(1, 2, 3, r);
    wait_idle();
    for (int i = 0; i < 3; i++) begin
      bus(0, 5, 0, r);
      check(r[7:0] == vals[0], $sformatf("multi-byte read %0d", i));
    end
    bus(0, 6, 0, r);
    check(r[2], "RX FIFO empty after reads");
    // wrong chip ID: no acknowledge
    bus(1, 1, {4'hA, 3'd0}, r);
    bus(1, 4, 8'h12, r);
    bus(1, 3, 0, r);
    wait_idle();
    bus(0, 6, 0, r);
    check(r[1], "ack error for wrong chip ID");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
