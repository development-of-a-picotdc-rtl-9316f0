// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the full and empty flags, the count, and that a write when full
// and a read when empty are ignored.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [7:0] q[$];

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(count == 4'(q.size()), "count");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("data %h exp %h", rd_data, q[0]));
      wr_en   = ($urandom % 100) < ((i / 250) % 2 ? 70 : 35);
      rd_en   = ($urandom % 100) < 50;
      wr_data = 8'($urandom);
      begin
        bit do_wr, do_rd;
        do_wr = wr_en && q.size() < DEPTH;
        do_rd = rd_en && q.size() > 0;
        @(posedge clk);
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(wr_data);
      end
    end
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
