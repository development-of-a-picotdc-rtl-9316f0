// tb_ft245_master: FT245 master against the FT601 bus model.
// InBuff and OutBuff are modelled as queues with first-word-fall-through
// behaviour and a controllable full flag. Checks:
//  * master read: words queued by the host arrive in InBuff in order; the
//    turn-around cycle (OE_N low, RD_N high) precedes the first RD_N beat;
//  * InBuff full in the middle of a read stalls RD_N and the transfer
//    resumes without loss;
//  * master write: words in OutBuff reach the host in order, one per clock;
//  * write timeout when the host asks for more words than OutBuff holds;
//  * read timeout when InBuff stays full;
//  * the data bus is never driven by both sides.
module tb_ft245_master;
  localparam int TIMEOUT = 32;
  logic ft_clk = 0, clk, rst = 1;
  logic txe_n, rxf_n, wr_n, rd_n, oe_n, data_oe, be_oe;
  logic [31:0] data_from_chip, data_o;
  logic [3:0]  be_o;
  logic ib_wr_en, ib_full, ob_rd_en, ob_empty, rd_timeout, wr_timeout;
  logic [31:0] ib_wr_data, ob_rd_data;
  int checks = 0, failures = 0;

  assign clk = ~ft_clk;
  always #5 ft_clk = ~ft_clk;

  ft601_model u_chip (.clk(ft_clk), .wr_n, .rd_n, .oe_n, .data_i(data_o),
                      .data_o(data_from_chip), .txe_n, .rxf_n);

  ft245_master #(.TIMEOUT(TIMEOUT)) dut (
    .clk, .rst, .txe_n, .rxf_n, .wr_n, .rd_n, .oe_n,
    .data_i(data_from_chip), .data_o, .data_oe, .be_o, .be_oe,
    .ib_wr_en, .ib_wr_data, .ib_full, .ob_rd_en, .ob_rd_data, .ob_empty,
    .rd_timeout, .wr_timeout
  );

  // buffer models
  logic [31:0] ib_q[$], ob_q[$];
  bit ib_force_full = 0;
  assign ib_full    = ib_force_full;
  assign ob_empty   = (ob_q.size() == 0);
  assign ob_rd_data = ob_q.size() ? ob_q[0] : 32'h0;
  always @(posedge clk) begin
    bit w, r;
    logic [31:0] d;
    w = ib_wr_en; r = ob_rd_en; d = ib_wr_data;
    #1;
    if (w) ib_q.push_back(d);
    if (r) ob_q.delete(0);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // protocol monitors
  int ta_seen = 0, contention = 0, rd_gap = 0;
  logic oe_n_q = 1, rd_n_q = 1;
  always @(posedge clk) begin
    if (!rst && data_oe && !oe_n) contention++;
    if (!rst && !rd_n && rd_n_q && oe_n_q) rd_gap++;          // RD_N without prior OE_N
    if (!rst && !oe_n && oe_n_q && rd_n) ta_seen++;            // OE_N first, RD_N still high
    oe_n_q <= oe_n;
    rd_n_q <= rd_n;
  end

  logic [31:0] exp_q[$];

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    // ---- master read: 40 words from the host
    for (int i = 0; i < 40; i++) begin
      exp_q.push_back(32'hC0DE_0000 + i);
      u_chip.send_word(32'hC0DE_0000 + i);
    end
    // stall with InBuff full for a while after 10 words
    wait (ib_q.size() >= 10);
    @(negedge clk) ib_force_full = 1;
    repeat (TIMEOUT / 2) @(posedge clk);
    check(rd_n, "RD_N high while InBuff full");
    @(negedge clk) ib_force_full = 0;
    repeat (100) @(posedge clk);
    check(ib_q.size() == 40, $sformatf("InBuff got %0d words", ib_q.size()));
    for (int i = 0; i < 40 && i < ib_q.size(); i++)
      check(ib_q[i] == exp_q[i], $sformatf("InBuff word %0d %h", i, ib_q[i]));
    check(ta_seen >= 1, "turn-around before read phase");
    check(rd_gap == 0, "RD_N never without turn-around");
    check(!rd_timeout, "no read timeout on a short stall");
    // ---- master write: 50 words to the host, then check one word per clock
    for (int i = 0; i < 50; i++) ob_q.push_back(32'hBEEF_0000 + i);
    u_chip.request(50);
    begin
      int t0, t1;
      wait (!wr_n); t0 = $time;
      wait (u_chip.rx_q.size() == 50); t1 = $time;
      check((t1 - t0) / 10 <= 51, $sformatf("50 words in %0d clocks", (t1 - t0) / 10));
    end
    for (int i = 0; i < 50; i++)
      check(u_chip.rx_q[i] == 32'hBEEF_0000 + i, $sformatf("host word %0d", i));
    check(!wr_timeout, "no write timeout yet");
    // ---- write timeout: host wants 10 words, only 4 available
    for (int i = 0; i < 4; i++) ob_q.push_back(32'hFACE_0000 + i);
    u_chip.request(10);
    repeat (TIMEOUT + 40) @(posedge clk);
    check(wr_timeout, "write timeout raised");
    check(u_chip.rx_q.size() == 54, "4 words delivered before timeout");
    // more data arrives later: the master resumes and completes the request
    for (int i = 0; i < 6; i++) ob_q.push_back(32'hFACE_0100 + i);
    repeat (40) @(posedge clk);
    check(u_chip.rx_q.size() == 60 && txe_n, "request completed later");
    // ---- read timeout: InBuff full for longer than TIMEOUT
    @(negedge clk) ib_force_full = 1;
    for (int i = 0; i < 5; i++) u_chip.send_word(32'h7777_0000 + i);
    repeat (20) @(posedge clk);
    @(negedge clk) ib_force_full = 0;
    wait (!rd_n);
    @(negedge clk) ib_force_full = 1;
    repeat (TIMEOUT + 10) @(posedge clk);
    check(rd_timeout, "read timeout raised");
    @(negedge clk) ib_force_full = 0;
    repeat (40) @(posedge clk);
    check(ib_q.size() == 45 && ib_q[ib_q.size()-1] == 32'h7777_0004, $sformatf("remaining words read after timeout (%0d)", ib_q.size()));
    check(contention == 0, "no bus contention");
    check(be_o == 4'hF, "all byte enables set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
