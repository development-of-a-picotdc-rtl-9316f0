// tb_dc_fifo: dual-clock FIFO between a 100 MHz writer and a 40 MHz reader
// (the InBuff/OutBuff clocks). Random traffic in both directions, checking
// data order against a queue model, then a fill test with the reader
// stopped: exactly DEPTH + 1 words must be accepted before wr_full, and all
// of them must come out in order. A last check measures the write-to-read
// latency (3 to 5 read clocks).
module tb_dc_fifo;
  localparam int DEPTH = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  logic wr_en = 0, rd_en = 0, wr_full, rd_empty;
  logic [31:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  int n_written = 0, n_read = 0;
  bit reader_on = 1;
  int rd_prob = 50;

  dc_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5    wr_clk = ~wr_clk;
  always #12.5 rd_clk = ~rd_clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // reader: takes a word whenever not empty and it decides to
  always @(posedge rd_clk) begin
    if (!rd_rst && rd_en && !rd_empty) begin
      check(q.size() > 0 && rd_data == q[0], $sformatf("read %h exp %h", rd_data, q.size() ? q[0] : 0));
      if (q.size() > 0) void'(q.pop_front());
      n_read++;
    end
  end
  always @(negedge rd_clk) rd_en <= reader_on && (($urandom % 100) < rd_prob);

  initial begin
    int accepted;
    repeat (4) @(posedge rd_clk);
    wr_rst = 0; rd_rst = 0;
    // random phase
    for (int i = 0; i < 3000; i++) begin
      @(negedge wr_clk);
      wr_en   = ($urandom % 100) < 30;
      wr_data = $urandom;
      if (wr_en && !wr_full) begin q.push_back(wr_data); n_written++; end
      @(posedge wr_clk);
    end
    @(negedge wr_clk) wr_en = 0;
    rd_prob = 100;
    repeat (200) @(posedge rd_clk);
    check(q.size() == 0 && rd_empty, "drained after random phase");
    // fill phase with reader stopped
    reader_on = 0;
    repeat (4) @(posedge rd_clk);
    accepted = 0;
    for (int i = 0; i < 3 * DEPTH; i++) begin
      @(negedge wr_clk);
      wr_en   = 1;
      wr_data = 32'hA000_0000 + i;
      if (!wr_full) begin q.push_back(wr_data); accepted++; end
      @(posedge wr_clk);
      if (i % 4 == 3) begin @(negedge wr_clk) wr_en = 0; repeat (2) @(posedge rd_clk); end
    end
    @(negedge wr_clk) wr_en = 0;
    check(accepted == DEPTH + 1, $sformatf("capacity %0d exp %0d", accepted, DEPTH + 1));
    check(wr_full, "full flag while reader stopped");
    reader_on = 1;
    repeat (200) @(posedge rd_clk);
    check(q.size() == 0, "all fill-phase words read");
    // latency: one word into an empty FIFO
    reader_on = 0;
    @(negedge wr_clk); wr_en = 1; wr_data = 32'h1234_5678;
    @(posedge wr_clk); q.push_back(wr_data);
    @(negedge wr_clk); wr_en = 0;
    begin
      int lat = 0;
      while (rd_empty && lat < 20) begin @(posedge rd_clk); lat++; end
      #1;
      check(!rd_empty && lat >= 2 && lat <= 5, $sformatf("latency %0d read clocks", lat));
      check(rd_data == 32'h1234_5678, "latency word");
    end
    reader_on = 1;
    repeat (10) @(posedge rd_clk);
    check(n_read == n_written + DEPTH + 2, "word count");
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
