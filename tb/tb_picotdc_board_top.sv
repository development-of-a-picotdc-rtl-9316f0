// tb_picotdc_board_top: end-to-end test of the board firmware at its
// default sizes (InBuff 1024 words, OutBuff 65536 words), from the USB side.
//
// Models attached: an FT601Q bus model on the FT245 port (the host writes
// bare IPbus transactions and asks for reply words), two LIROC I2C slave
// models (chip IDs 5 and 6), two LIROC analog-probe shift registers and
// two PicoTDC read-out ports that send idle frames with data frames
// mixed in on request. The PicoTDC I2C bus has no slave.
//
// A reply checker compares every word the host receives with the expected
// words (read data and status headers, built from the requests); a word
// that does not match but equals the previous status header (or 0 after an
// interface reset) is counted as the junk word that starts every burst.
// The host only asks for as many words as are still expected, except in
// the write-timeout test.
//
// Mechanisms counted, each must happen at least once: master read with its
// turn-around cycle, master write, junk word, single write/read, block
// read (incrementing), non-incrementing block read of PicoTDC data,
// PicoTDC idle-frame drop, LIROC I2C register write and read on both
// chips, LIROC power/reset pins, I2C missing acknowledge, analog-probe
// setup and readback on both chips, bus error on an unmapped address,
// invalid header, soft reset, interface reset ("nuke"), write timeout,
// read timeout, OutBuff-full stall, InBuff-full stall.
module tb_picotdc_board_top;
  import ipbus_pkg::*;

  logic ipb_clk = 0, ft_clk = 0, sys_rstn = 0;
  logic [1:0] tdc_rx_clk = '0;
  logic ft_txe_n, ft_rxf_n, ft_wr_n, ft_rd_n, ft_oe_n, ft_data_oe, ft_be_oe;
  logic [31:0] ft_data_i, ft_data_o;
  logic [3:0]  ft_be_o;
  logic tdc_scl_oe, tdc_sda_oe, tdc_sda_i;
  logic [7:0] tdc_rx_data [2];
  logic [1:0] tdc_rx_sync;
  logic [1:0] lr_scl_oe, lr_sda_oe, lr_sda_i, lr_power_on, lr_reset_n;
  logic lr_clk_sm_i2c;
  logic [1:0] lr_sr_clk, lr_sr_rst, lr_srin, lr_srout;
  logic [3:0] status_o;
  int checks = 0, failures = 0;

  always #12.5 ipb_clk = ~ipb_clk;       // 40 MHz
  always #5    ft_clk  = ~ft_clk;        // 100 MHz
  always #4    tdc_rx_clk[0] = ~tdc_rx_clk[0];
  always #4.2  tdc_rx_clk[1] = ~tdc_rx_clk[1];

  picotdc_board_top dut (.*);

  ft601_model u_ft (.clk(ft_clk), .wr_n(ft_wr_n), .rd_n(ft_rd_n), .oe_n(ft_oe_n),
                    .data_i(ft_data_o), .data_o(ft_data_i), .txe_n(ft_txe_n), .rxf_n(ft_rxf_n));

  // LIROC slow control: open-drain lines with pull-ups
  logic [1:0] lr_pull;
  wire  [1:0] lr_scl = ~lr_scl_oe;
  wire  [1:0] lr_sda = ~(lr_sda_oe | lr_pull);
  assign lr_sda_i  = lr_sda;
  assign tdc_sda_i = !tdc_sda_oe;
  liroc_i2c_model #(.CHIP_ID(4'h5)) u_lr_a (.scl(lr_scl[0]), .sda(lr_sda[0]), .sda_pull(lr_pull[0]));
  liroc_i2c_model #(.CHIP_ID(4'h6)) u_lr_b (.scl(lr_scl[1]), .sda(lr_sda[1]), .sda_pull(lr_pull[1]));
  liroc_probe_model u_pr_a (.sr_clk(lr_sr_clk[0]), .sr_rst(lr_sr_rst[0]), .srin(lr_srin[0]), .srout(lr_srout[0]));
  liroc_probe_model u_pr_b (.sr_clk(lr_sr_clk[1]), .sr_rst(lr_sr_rst[1]), .srin(lr_srin[1]), .srout(lr_srout[1]));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- PicoTDC read-out ports ----------------
  // Each port sends frames continuously, MSB byte first with sync on the
  // first byte: queued data frames when there are any, idle frames if not.
  logic [31:0] tdc_q0[$], tdc_q1[$];
  int n_idle_frames = 0;
  initial begin
    tdc_rx_data[0] = 8'hD0; tdc_rx_data[1] = 8'hD0; tdc_rx_sync = '0;
  end
  for (genvar c = 0; c < 2; c++) begin : g_port
    initial forever begin
      logic [31:0] w;
      if (c == 0 && tdc_q0.size()) w = tdc_q0.pop_front();
      else if (c == 1 && tdc_q1.size()) w = tdc_q1.pop_front();
      else begin w = TDC_IDLE_WORD; n_idle_frames++; end
      for (int i = 0; i < 4; i++) begin
        @(negedge tdc_rx_clk[c]);
        tdc_rx_data[c] = w[31 - 8*i -: 8];
        tdc_rx_sync[c] = (i == 0);
      end
    end
  end

  // ---------------- reply checker ----------------
  logic [31:0] exp_q[$];
  logic [31:0] last_hdr = 32'h0;
  int n_junk = 0, n_matched = 0, n_bad = 0, tid = 0;
  bit host_pull = 1;      // ask for the expected words automatically
  bit chk_on = 1;         // the checker takes the words the host receives

  function automatic logic [31:0] hdr(input int t, input int words, input int typ, input int info);
    return {4'h2, 12'(t), 8'(words), 4'(typ), 4'(info)};
  endfunction
  function automatic bit is_status(input logic [31:0] w);
    return w[31:28] == 4'h2 && w[3:0] != 4'hF;
  endfunction

  always @(posedge ft_clk) begin
    while (chk_on && u_ft.rx_q.size() > 0) begin
      logic [31:0] w;
      w = u_ft.rx_q.pop_front();
      if (exp_q.size() && w == exp_q[0]) begin
        void'(exp_q.pop_front());
        n_matched++;
        if (is_status(w)) last_hdr = w;
      end else if (w == last_hdr || w == 32'h0) begin
        n_junk++;
      end else begin
        n_bad++;
        failures++;
        if (n_bad < 10) $display("FAIL reply word %h, expected %h", w, exp_q.size() ? exp_q[0] : 32'hx);
      end
    end
    if (host_pull && u_ft.req_left == 0 && u_ft.req_add == 0 && exp_q.size() > 0)
      u_ft.request(exp_q.size() > 512 ? 512 : exp_q.size());
  end

  // ---------------- mechanism counters ----------------
  int n_ta = 0, n_rd_no_ta = 0, n_ib_stall = 0, n_ob_stall = 0;
  logic oe_q = 1;
  always @(negedge ft_clk) begin
    if (!ft_oe_n && ft_rd_n) n_ta++;
    if (!ft_rd_n && oe_q) n_rd_no_ta++;
    if (!ft_rxf_n && !ft_oe_n && dut.ib_full) n_ib_stall++;
    oe_q = ft_oe_n;
  end
  always @(posedge ipb_clk) if (dut.ob_full && dut.tr_busy) n_ob_stall++;

  // ---------------- host operations ----------------
  task automatic send(input logic [31:0] w);
    u_ft.send_word(w);
  endtask

  // wait until every expected reply word has arrived
  task automatic settle(input string what, input int max_ns = 20_000_000);
    int t = 0;
    while ((exp_q.size() > 0 || u_ft.rxf_n == 1'b0 || dut.tr_busy) && t < max_ns) begin
      #100ns; t += 100;
    end
    check(exp_q.size() == 0, $sformatf("%s: %0d reply words missing", what, exp_q.size()));
    exp_q.delete();
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    send(hdr(tid, 1, 3, 15)); send(a); send(d);
    exp_q.push_back(hdr(tid, 1, 3, 0));
    tid = (tid + 1) % 4096;
  endtask

  // read whose reply is checked later; returns nothing
  task automatic rd_exp(input logic [31:0] a, input logic [31:0] d);
    send(hdr(tid, 1, 2, 15)); send(a);
    exp_q.push_back(d);
    exp_q.push_back(hdr(tid, 1, 2, 0));
    tid = (tid + 1) % 4096;
  endtask

  // read whose value is returned (the checker is bypassed for this word)
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    int t = 0;
    settle("before read");
    host_pull = 0;
    chk_on = 0;
    send(hdr(tid, 1, 2, 15)); send(a);
    u_ft.request(3);
    while (u_ft.rx_q.size() < 3 && t < 200000) begin #100ns; t += 100; end
    @(negedge ft_clk);
    check(u_ft.rx_q.size() == 3, $sformatf("read %h: %0d words", a, u_ft.rx_q.size()));
    void'(u_ft.rx_q.pop_front());   // junk
    n_junk++;
    d = u_ft.rx_q.pop_front();
    last_hdr = u_ft.rx_q.pop_front();
    check(last_hdr == hdr(tid, 1, 2, 0), $sformatf("read %h: status %h", a, last_hdr));
    tid = (tid + 1) % 4096;
    host_pull = 1;
    chk_on = 1;
  endtask

  // LIROC register access through the I2C master at slave 2 + chip
  task automatic i2c_wait(input int slv, output logic [31:0] st);
    do begin
      #2us;
      rd({20'd0, 4'(slv), 8'h06}, st);
    end while (st[0]);
  endtask
  task automatic i2c_frame_wr(input int slv, input logic [6:0] dev, input logic [7:0] b);
    logic [31:0] st;
    wr({20'd0, 4'(slv), 8'h01}, 32'(dev));
    wr({20'd0, 4'(slv), 8'h04}, 32'(b));
    wr({20'd0, 4'(slv), 8'h03}, 32'h1);
    settle("i2c frame");
    i2c_wait(slv, st);
    check(!st[1], $sformatf("I2C frame to %h acknowledged", dev));
  endtask
  task automatic liroc_write(input int ab, input logic [3:0] id, input logic [15:0] ladd, input logic [7:0] v);
    i2c_frame_wr(2 + ab, {id, 3'd0}, ladd[7:0]);
    i2c_frame_wr(2 + ab, {id, 3'd1}, ladd[15:8]);
    i2c_frame_wr(2 + ab, {id, 3'd2}, v);
  endtask
  task automatic liroc_read(input int ab, input logic [3:0] id, input logic [15:0] ladd, output logic [7:0] v);
    logic [31:0] st, d;
    i2c_frame_wr(2 + ab, {id, 3'd0}, ladd[7:0]);
    i2c_frame_wr(2 + ab, {id, 3'd1}, ladd[15:8]);
    wr({20'd0, 4'(2 + ab), 8'h01}, 32'({id, 3'd2}));
    wr({20'd0, 4'(2 + ab), 8'h02}, 32'd1);
    settle("i2c read start");
    i2c_wait(2 + ab, st);
    rd({20'd0, 4'(2 + ab), 8'h05}, d);
    v = d[7:0];
  endtask

  // ---------------- test sequence ----------------
  int mech[string];
  logic [31:0] d;
  logic [7:0]  b;

  initial begin
    for (int c = 0; c < 2; c++) begin lr_pull[c] = 1'b0; end
    #1us;
    sys_rstn = 1;
    #3us;

    // single write / read of the scratch register, one burst
    wr(32'h002, 32'hCAFE_0001);
    rd_exp(32'h002, 32'hCAFE_0001);
    settle("single write/read");
    mech["single write/read"] = n_matched;
    mech["master read"] = u_ft.n_rd_beats;
    mech["master write"] = u_ft.n_wr_beats;
    check(n_rd_no_ta == 0, "every RD_N beat run follows a turn-around cycle");
    mech["turn-around"] = n_ta;

    // incrementing block read of the control slave: status, scratch, ID
    send(hdr(tid, 3, 0, 15)); send(32'h001);
    exp_q.push_back(32'(status_o) | 32'h8); exp_q.push_back(32'hCAFE_0001); exp_q.push_back(32'h5043_5444);
    exp_q.push_back(hdr(tid, 3, 0, 0)); tid++;
    settle("block read");
    mech["block read"] = 1;

    // PicoTDC data: frames mixed into the idle stream of port A, then a
    // 255-word non-incrementing read of the data register
    for (int i = 0; i < 40; i++) tdc_q0.push_back(32'h4000_0000 | 32'(i * 7919));
    #3us;
    check(n_idle_frames > 0, "idle frames sent");
    send(hdr(tid, 255, 2, 15)); send(32'h500);
    for (int i = 0; i < 40; i++) exp_q.push_back(32'h4000_0000 | 32'(i * 7919));
    for (int i = 40; i < 255; i++) exp_q.push_back(TDC_IDLE_WORD);
    exp_q.push_back(hdr(tid, 255, 2, 0)); tid++;
    settle("PicoTDC block read");
    mech["PicoTDC block read"] = 1;
    mech["idle frames dropped"] = n_idle_frames;
    rd(32'h601, d);
    check(d == 32'h1, $sformatf("PicoTDC B: empty, no overflow (%h)", d));

    // bus error: unmapped slave 7 and an address above the map
    send(hdr(tid, 1, 2, 15)); send(32'h700);
    exp_q.push_back(hdr(tid, 0, 2, 4)); tid++;
    send(hdr(tid, 1, 3, 15)); send(32'h0010_0002); send(32'h1234);
    exp_q.push_back(hdr(tid, 0, 3, 5)); tid++;
    rd_exp(32'h002, 32'hCAFE_0001);
    settle("bus error");
    mech["bus error"] = 1;

    // LIROC power and reset pins, then register access on both chips
    wr(32'h207, 32'h3);
    wr(32'h307, 32'h2);
    settle("power pins");
    check(lr_power_on == 2'b11 && lr_reset_n == 2'b01, $sformatf("power %b reset_n %b", lr_power_on, lr_reset_n));
    mech["LIROC power/reset pins"] = 1;
    wr(32'h200, {16'd4, 16'd20});      // faster SCL on LIROC A; B keeps the reset value
    liroc_write(0, 4'h5, {8'h12, 3'd5, 5'd9}, 8'hA7);
    check(u_lr_a.regs.exists(int'({8'h12, 3'd5, 5'd9})) && u_lr_a.regs[int'({8'h12, 3'd5, 5'd9})] == 8'hA7,
          "LIROC A register written");
    liroc_write(1, 4'h6, 16'h0301, 8'h5C);
    check(u_lr_b.regs.exists(int'(16'h0301)) && u_lr_b.regs[int'(16'h0301)] == 8'h5C, "LIROC B register written");
    mech["LIROC I2C write"] = u_lr_a.n_writes + u_lr_b.n_writes;
    liroc_read(0, 4'h5, {8'h12, 3'd5, 5'd9}, b);
    check(b == 8'hA7, $sformatf("LIROC A read back %h", b));
    liroc_read(1, 4'h6, 16'h0301, b);
    check(b == 8'h5C, $sformatf("LIROC B read back %h", b));
    mech["LIROC I2C read"] = u_lr_a.n_reads + u_lr_b.n_reads;

    // PicoTDC I2C: nobody answers
    wr(32'h101, 32'h62);
    wr(32'h104, 32'h00);
    wr(32'h103, 32'h1);
    settle("PicoTDC I2C");
    i2c_wait(1, d);
    check(d[1], "PicoTDC I2C: missing acknowledge flagged");
    mech["I2C no acknowledge"] = d[1];

    // analog probe on both LIROCs
    wr(32'h400, {2'b11, 14'd0, 8'd77, 8'd3});
    settle("probe start");
    do begin #20us; rd(32'h400, d); end while (d[31:30] != 2'b00);
    rd(32'h401, d);
    check(d == 32'd3 && u_pr_a.ones() == 1 && u_pr_a.sr[3], $sformatf("probe A at 3 (readback %0d)", d));
    rd(32'h402, d);
    check(d == 32'd77 && u_pr_b.ones() == 1 && u_pr_b.sr[77], $sformatf("probe B at 77 (readback %0d)", d));
    mech["analog probe setup"] = u_pr_a.n_clk + u_pr_b.n_clk;

    // invalid header: one junk word comes back and the error flag is set
    begin
      int j0;
      j0 = n_junk;
      host_pull = 0;
      send(32'h1234_5678);
      u_ft.request(1);
      #5us;
      check(n_junk == j0 + 1, $sformatf("invalid header answered with one word (%0d, bad %0d, last %h, exp %0d)", n_junk - j0, n_bad, last_hdr, exp_q.size()));
      check(status_o[2], "invalid header flagged");
      mech["invalid header"] = status_o[2];
      host_pull = 1;
    end

    // soft reset: clears the scratch register and the header-error flag,
    // leaves the interface running
    wr(32'h002, 32'h0BAD_F00D);
    wr(32'h000, 32'h1);
    settle("soft reset");
    #2us;
    rd(32'h002, d);
    check(d == 32'h0 && !status_o[2], $sformatf("soft reset: scratch %h, status %b", d, status_o));
    mech["soft reset"] = (d == 0);

    // write timeout: the host asks for more words than will come
    host_pull = 0;
    u_ft.request(8);
    send(hdr(tid, 1, 2, 15)); send(32'h003);
    exp_q.push_back(32'h5043_5444); exp_q.push_back(hdr(tid, 1, 2, 0)); tid++;
    #30us;
    @(posedge ft_clk) u_ft.cancel();
    check(exp_q.size() == 0, "reply before the write timeout");
    #1us;
    check(status_o[1], "write timeout flagged");
    mech["write timeout"] = status_o[1];
    host_pull = 1;

    // interface reset ("nuke"): clears the timeout flag; the next burst
    // starts with a zero junk word
    send(hdr(tid, 1, 3, 15)); send(32'h000); send(32'h2); tid++;
    #5us;
    check(!status_o[1], "nuke cleared the write timeout");
    last_hdr = 32'h0;
    rd_exp(32'h003, 32'h5043_5444);
    settle("after nuke");
    mech["nuke"] = !status_o[1];

    // stalls: the host sends 300 block reads of the (empty) PicoTDC B data
    // register, 76,800 reply words in all, and 600 scratch writes, without
    // asking for replies. OutBuff fills and stalls the transactor, InBuff
    // then fills and stalls (and times out) the USB read. Then the host
    // reads everything.
    host_pull = 0;
    for (int i = 0; i < 300; i++) begin
      send(hdr(tid, 255, 2, 15)); send(32'h600);
      for (int k = 0; k < 255; k++) exp_q.push_back(TDC_IDLE_WORD);
      exp_q.push_back(hdr(tid, 255, 2, 0)); tid++;
    end
    for (int i = 0; i < 600; i++) wr(32'h002, 32'(i + 1));
    #2ms;
    mech["OutBuff-full stall"] = n_ob_stall;
    mech["InBuff-full stall"] = n_ib_stall;
    check(status_o[0], "read timeout flagged while InBuff stays full");
    mech["read timeout"] = status_o[0];
    host_pull = 1;
    settle("stall test", 40_000_000);
    rd(32'h002, d);
    check(d == 32'd600, $sformatf("last scratch write %0d", d));

    mech["junk word"] = n_junk;
    check(n_bad == 0, $sformatf("%0d unexpected reply words", n_bad));
    foreach (mech[k]) begin
      $display("mechanism %-24s %0d", k, mech[k]);
      check(mech[k] > 0, $sformatf("mechanism never happened: %s", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("watchdog: exp_q %0d, rx_q %0d", exp_q.size(), u_ft.rx_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
