// tb_i2c_master_fsm: bit-level checks of the I2C master logic against the
// LIROC I2C slave model: SDA changes only while SCL is low (except for
// START and STOP), exactly data_setup clocks after SCL falls; one START and
// one STOP per transfer; the address and data bits sent; a two-byte read
// with ACK after the first byte and NACK after the last; ack_err on a
// missing acknowledge; TX FIFO pop on a write.
module tb_i2c_master_fsm;
  localparam logic [3:0] CHIP = 4'h3;
  localparam int SCL_LEN = 8, SETUP = 3;
  logic clk = 0, rst = 1;
  logic [6:0] dev_addr = 0;
  logic start_wr = 0, start_rd = 0;
  logic [8:0] rd_len = 0;
  logic [7:0] tx_data = 0, rx_data;
  logic tx_empty = 1, tx_pop, rx_push, busy, ack_err;
  logic scl_oe, sda_oe, sda_i, sda_pull;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || sda_pull);
  assign sda_i = sda;
  int checks = 0, failures = 0;

  i2c_master_fsm dut (.clk, .rst, .scl_len(16'(SCL_LEN)), .data_setup(16'(SETUP)),
    .dev_addr, .start_wr, .start_rd, .rd_len, .tx_data, .tx_empty, .tx_pop,
    .rx_data, .rx_push, .busy, .ack_err, .scl_oe, .sda_oe, .sda_i);
  liroc_i2c_model #(.CHIP_ID(CHIP)) u_sl (.scl, .sda, .sda_pull);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // monitors: master SDA changes relative to SCL
  int n_start = 0, n_stop = 0, bad_change = 0, since_fall = 0, bad_setup = 0, n_pop = 0;
  logic sda_oe_q = 0, scl_q = 1, sda_q = 1;
  logic [7:0] rx_bytes[$];
  logic [31:0] bits_sent;    // first address bits seen after START
  int nbits = 0;
  always @(posedge clk) begin
    if (!rst) begin
      since_fall = (scl_q && !scl) ? 0 : since_fall + 1;
      if (sda_oe != sda_oe_q) begin
        if (scl && scl_q) begin
          // only START (SDA falls) / STOP (SDA rises) may change with SCL high
          if (sda_oe) n_start++; else n_stop++;
        end else if (since_fall != SETUP + 1) bad_setup++;
      end
      if (!scl_q && scl) begin bits_sent = {bits_sent[30:0], sda}; nbits++; end
      if (tx_pop) n_pop++;
      if (rx_push) rx_bytes.push_back(rx_data);
    end
    sda_oe_q <= sda_oe; scl_q <= scl; sda_q <= sda;
  end

  task automatic go(input bit rd, input logic [6:0] a, input int n);
    @(negedge clk);
    dev_addr = a; rd_len = 9'(n);
    if (rd) start_rd = 1; else start_wr = 1;
    @(negedge clk);
    start_rd = 0; start_wr = 0;
    wait (!busy);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    // write frame 0: address low byte 0xA5
    tx_data = 8'hA5; tx_empty = 0;
    nbits = 0;
    fork
      begin wait (tx_pop); @(negedge clk) tx_empty = 1; end
    join_none
    go(0, {CHIP, 3'd0}, 0);
    check(n_start == 1 && n_stop == 1, $sformatf("start %0d stop %0d", n_start, n_stop));
    check(nbits == 19, $sformatf("18 SCL pulses plus the STOP rise for a write (%0d)", nbits));
    check(bits_sent[18:11] == {CHIP, 3'd0, 1'b0}, $sformatf("address bits %b", bits_sent[18:11]));
    check(bits_sent[9:2] == 8'hA5, $sformatf("data bits %b", bits_sent[9:2]));
    check(!bits_sent[10] && !bits_sent[1], "both bytes acknowledged");
    check(!ack_err && n_pop == 1, "no ack error, one TX pop");
    check(u_sl.ladd[7:0] == 8'hA5, "slave got the low address byte");
    // put a value in the model and read two bytes of it
    u_sl.regs[int'(u_sl.ladd)] = 8'h3C;
    nbits = 0;
    go(1, {CHIP, 3'd2}, 2);
    check(rx_bytes.size() == 2 && rx_bytes[0] == 8'h3C && rx_bytes[1] == 8'h3C, "two bytes read");
    check(nbits == 28, $sformatf("27 SCL pulses plus the STOP rise for a 2-byte read (%0d)", nbits));
    check(!bits_sent[10] && bits_sent[1], "master ACK after byte 1, NACK after byte 2");
    check(n_start == 2 && n_stop == 2, "one START/STOP per transfer");
    // wrong address: no acknowledge
    tx_empty = 0;
    go(0, {4'h9, 3'd0}, 0);
    check(ack_err, "ack error without acknowledge");
    check(n_pop == 1, "no TX pop when the address is not acknowledged");
    check(bad_setup == 0, $sformatf("SDA changed %0d times off the setup point", bad_setup));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
