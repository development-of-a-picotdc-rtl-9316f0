// tb_ipbus_transactor: IPbus transactor between a queue model of InBuff, a
// queue model of OutBuff and a model IPbus slave with random wait states.
// The expected reply stream of each command burst is built by the
// testbench from the request words: a junk first word, then per
// transaction its read data followed by its status header. Covered:
// non-incrementing single write/read (the host library's two operations),
// incrementing block write/read, a 12-word non-incrementing block read of
// a FIFO slave, zero-word transaction, bus error on read and on write
// (with the remaining write words dropped), bus timeout, invalid header,
// and OutBuff full (strobe held low until room).
module tb_ipbus_transactor;
  import ipbus_pkg::*;
  localparam int TIMEOUT = 40;
  logic clk = 0, rst = 1;
  logic [31:0] rx_data, tx_data;
  logic rx_ready, rx_next, tx_we, tx_full, hdr_err, busy;
  ipb_wbus_t ipb_w;
  ipb_rbus_t ipb_r;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  ipbus_transactor #(.TIMEOUT(TIMEOUT)) dut (
    .clk, .rst, .rx_data, .rx_ready, .rx_next, .tx_data, .tx_we, .tx_full,
    .ipb_out(ipb_w), .ipb_in(ipb_r), .hdr_err, .busy
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- InBuff / OutBuff models
  logic [31:0] rxq[$], txq[$];
  bit force_full = 0;
  assign rx_ready = rxq.size() > 0;
  assign rx_data  = rxq.size() ? rxq[0] : 32'h0;
  assign tx_full  = force_full;
  always @(posedge clk) begin
    bit n, w; logic [31:0] d;
    n = rx_next; w = tx_we; d = tx_data;
    #1;
    if (n) void'(rxq.pop_front());
    if (w) txq.push_back(d);
  end

  // ---- IPbus slave model
  //   0x0000-0x00FF registers, 0x1000 FIFO-like counter,
  //   0xE000 bus error, 0xF000 never answers
  logic [31:0] mem [256];
  logic [31:0] fifo_cnt;
  int wcnt, wneed;
  int strobe_while_full = 0, hdr_err_pulses = 0;
  always_comb begin
    ipb_r = '{rdata: '0, ack: 1'b0, err: 1'b0};
    if (ipb_w.strobe) begin
      if (ipb_w.addr[15:12] == 4'hE)      ipb_r.err = 1'b1;
      else if (ipb_w.addr[15:12] == 4'hF) ipb_r.ack = 1'b0;
      else if (wcnt >= wneed) begin
        ipb_r.ack   = 1'b1;
        ipb_r.rdata = (ipb_w.addr[15:12] == 4'h1) ? fifo_cnt : mem[ipb_w.addr[7:0]];
      end
    end
  end
  always @(posedge clk) begin
    if (ipb_w.strobe && force_full && !ipb_w.write) strobe_while_full++;
    if (hdr_err) hdr_err_pulses++;
    if (ipb_w.strobe && ipb_r.ack) begin
      wcnt  <= 0;
      wneed <= $urandom % 3;
      if (ipb_w.write) mem[ipb_w.addr[7:0]] <= ipb_w.wdata;
      if (ipb_w.addr[15:12] == 4'h1) fifo_cnt <= fifo_cnt + 1;
    end else if (ipb_w.strobe) begin
      wcnt <= wcnt + 1;
    end
  end

  // ---- request builders and expected replies
  logic [31:0] exp_q[$];
  logic [31:0] ref_mem [256];
  int tid = 0;

  function automatic logic [31:0] hdr(input int t, input int words, input int typ, input int info);
    return {4'h2, 12'(t), 8'(words), 4'(typ), 4'(info)};
  endfunction

  task automatic wr(input int typ, input logic [31:0] a, input logic [31:0] d[$]);
    rxq.push_back(hdr(tid, d.size(), typ, 15));
    rxq.push_back(a);
    foreach (d[i]) begin
      rxq.push_back(d[i]);
      ref_mem[(typ == 1) ? 8'(a + i) : 8'(a)] = d[i];
    end
    exp_q.push_back(hdr(tid, d.size(), typ, 0));
    tid++;
  endtask

  task automatic rd(input int typ, input logic [31:0] a, input int n);
    rxq.push_back(hdr(tid, n, typ, 15));
    rxq.push_back(a);
    for (int i = 0; i < n; i++) exp_q.push_back(ref_mem[(typ == 0) ? 8'(a + i) : 8'(a)]);
    exp_q.push_back(hdr(tid, n, typ, 0));
    tid++;
  endtask

  task automatic run_burst(input string name, input int max_cycles = 2000);
    int c = 0;
    exp_q.push_front(32'h0);   // placeholder for the junk word
    while ((rxq.size() > 0 || busy) && c < max_cycles) begin @(posedge clk); c++; end
    repeat (3) @(posedge clk);
    check(txq.size() == exp_q.size(), $sformatf("%s: %0d reply words, expected %0d", name, txq.size(), exp_q.size()));
    for (int i = 1; i < exp_q.size() && i < txq.size(); i++)
      check(txq[i] == exp_q[i], $sformatf("%s: word %0d = %h, expected %h", name, i, txq[i], exp_q[i]));
    txq.delete();
    exp_q.delete();
  endtask

  initial begin
    logic [31:0] d[$];
    for (int i = 0; i < 256; i++) begin mem[i] = 32'(i) * 32'h0101_0101; ref_mem[i] = mem[i]; end
    fifo_cnt = 32'h100; wcnt = 0; wneed = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (2) @(posedge clk);

    // 1. single non-incrementing write then read (host wrnReg / rdnReg)
    d = '{32'hAAAA_5555};
    wr(3, 32'h10, d);
    rd(2, 32'h10, 1);
    run_burst("single w/r");
    check(mem[16] == 32'hAAAA_5555, "register written");

    // 2. incrementing block write and read back
    d = '{32'h11, 32'h22, 32'h33, 32'h44};
    wr(1, 32'h20, d);
    rd(0, 32'h1F, 6);
    run_burst("block w/r");

    // 3. non-incrementing block read of a FIFO slave: successive values
    rxq.push_back(hdr(tid, 12, 2, 15)); rxq.push_back(32'h1000);
    for (int i = 0; i < 12; i++) exp_q.push_back(32'h100 + i);
    exp_q.push_back(hdr(tid, 12, 2, 0)); tid++;
    run_burst("fifo block read");

    // 4. zero-word transaction
    rxq.push_back(hdr(tid, 0, 0, 15)); rxq.push_back(32'h0);
    exp_q.push_back(hdr(tid, 0, 0, 0)); tid++;
    run_burst("zero words");

    // 5. bus error on read, on a 3-word write (words dropped), then a read
    rxq.push_back(hdr(tid, 2, 0, 15)); rxq.push_back(32'hE000);
    exp_q.push_back(hdr(tid, 0, 0, 4)); tid++;
    rxq.push_back(hdr(tid, 3, 1, 15)); rxq.push_back(32'hE000);
    rxq.push_back(32'h1); rxq.push_back(32'h2); rxq.push_back(32'h3);
    exp_q.push_back(hdr(tid, 0, 1, 5)); tid++;
    rd(2, 32'h10, 1);
    run_burst("bus errors");

    // 6. timeout
    rxq.push_back(hdr(tid, 1, 2, 15)); rxq.push_back(32'hF000);
    exp_q.push_back(hdr(tid, 0, 2, 6)); tid++;
    run_burst("timeout");

    // 7. invalid header: error pulse, nothing but the junk word
    rxq.push_back(32'h1000_013F); rxq.push_back(32'h10);
    hdr_err_pulses = 0;
    exp_q.push_front(32'h0);
    repeat (20) @(posedge clk);
    check(hdr_err_pulses >= 1, "invalid header flagged");
    // the FSM restarts on the left-over word, which is not a header either
    repeat (20) @(posedge clk);
    check(rxq.size() == 0, "left-over words consumed");
    txq.delete(); exp_q.delete();

    // 8. OutBuff full in the middle of a block read
    rd(0, 32'h40, 20);
    fork
      begin
        wait (txq.size() >= 6);
        @(negedge clk) force_full = 1;
        repeat (30) @(posedge clk);
        @(negedge clk) force_full = 0;
      end
    join_none
    run_burst("outbuff full", 4000);
    check(strobe_while_full == 0, "no read strobe while OutBuff full");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
