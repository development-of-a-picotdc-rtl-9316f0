// ft601_model: behavioural model of the FIFO-bus side of an FT601Q USB
// bridge in FT245 synchronous mode, for testbenches.
//
// Host to board: send_word() queues words as if the USB host had written
// them; RXF_N is low while queued words remain. A word is taken on each
// falling clock edge with OE_N and RD_N low; data_o shows the next word.
// Board to host: request(n) asks for n words as a host read would; TXE_N
// is low while words are still owed. A word is captured on each falling
// edge with WR_N low, into rx_q; cancel() withdraws what is still owed.
// Flags change on the falling edge, like the
// chip's outputs.
module ft601_model (
  input  logic        clk,
  input  logic        wr_n,
  input  logic        rd_n,
  input  logic        oe_n,
  input  logic [31:0] data_i,     // from the FPGA
  output logic [31:0] data_o,     // to the FPGA
  output logic        txe_n,
  output logic        rxf_n
);
  logic [31:0] tx_q[$];
  logic [31:0] rx_q[$];
  int unsigned rd_idx   = 0;
  int unsigned req_left = 0;
  int unsigned n_rd_beats = 0;
  int unsigned n_wr_beats = 0;

  initial begin
    txe_n = 1'b1;
    rxf_n = 1'b1;
  end

  assign data_o = (rd_idx < tx_q.size()) ? tx_q[rd_idx] : 32'hFFFF_FFFF;

  task automatic send_word(input logic [31:0] w);
    tx_q.push_back(w);
  endtask

  // requests and cancels are posted here and taken by the edge process,
  // so a call at the same time as a clock edge is never lost
  int unsigned req_add = 0;
  bit          req_cancel = 0;

  task automatic request(input int unsigned n);
    req_add += n;
  endtask

  // the host gives up the rest of its read request
  task automatic cancel();
    req_cancel = 1;
  endtask

  always @(negedge clk) begin
    int unsigned idx_n, req_n;
    idx_n = rd_idx;
    req_n = req_cancel ? 0 : req_left;
    req_n += req_add;
    req_add = 0;
    req_cancel = 0;
    if (!rd_n && !oe_n && !rxf_n) begin
      idx_n++;
      n_rd_beats++;
    end
    if (!wr_n && !txe_n) begin
      rx_q.push_back(data_i);
      if (req_n > 0) req_n--;
      n_wr_beats++;
    end
    rd_idx   <= idx_n;
    req_left <= req_n;
    rxf_n    <= !(idx_n < tx_q.size());
    txe_n    <= (req_n == 0);
  end

endmodule
