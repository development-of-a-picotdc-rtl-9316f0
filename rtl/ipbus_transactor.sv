// ipbus_transactor: IPbus bus master fed by command words from the USB
// interface.
//
// The host sends bare IPbus transactions (no packet header): a transaction
// header word, an address word and, for writes, one data word per bus word.
// The transactor reads them from InBuff (rx_* port, first word fall
// through), performs the bus cycles and writes the reply to OutBuff (tx_*
// port): the read data words, then the transaction status header.
//
// Sequence: IDLE waits for rx_ready (InBuff not empty). HEADER writes the
// status header of the previous transaction to OutBuff. The first time
// HEADER is entered from IDLE there is no previous transaction, and the
// word written is a left-over (junk) header that the host discards; every
// burst of commands therefore answers with one junk word first. NEXT then
// takes the next word from InBuff: if InBuff is empty the burst is over and
// the FSM returns to IDLE; if the word is not a valid request header
// (version 2, info code 0xF, type 0..3) an error pulse is raised and the
// FSM returns to IDLE. ADDR takes the address word. For writes WDATA takes
// one data word before each bus cycle. BUS holds the strobe until the
// addressed slave answers with ack or err, or until TIMEOUT cycles pass.
// Reads raise the strobe only while OutBuff has room, and every acked read
// writes its data to OutBuff. Successive read cycles keep the strobe high.
// Incrementing types (0, 1) step the address after every word;
// non-incrementing types (2, 3) keep it, as needed to drain a FIFO slave.
// After a bus error or timeout in a write, the remaining data words of that
// transaction are read and dropped (DRAIN) so that the next header is
// found. The status header carries info code 0 (done), 4/5 (bus error on
// read/write) or 6/7 (timeout on read/write), and in its word count the
// number of words transferred.
//
// Timing: one bus word per cycle for zero-wait slaves on reads; writes
// take two cycles per word (data fetch, bus cycle). Synchronous reset.
module ipbus_transactor
  import ipbus_pkg::*;
#(
  parameter int unsigned TIMEOUT = 255          // bus cycles before timeout
) (
  input  logic        clk,
  input  logic        rst,
  // InBuff read side
  input  logic [31:0] rx_data,
  input  logic        rx_ready,
  output logic        rx_next,
  // OutBuff write side
  output logic [31:0] tx_data,
  output logic        tx_we,
  input  logic        tx_full,
  // IPbus master
  output ipb_wbus_t   ipb_out,
  input  ipb_rbus_t   ipb_in,
  // status
  output logic        hdr_err,       // one-cycle pulse: invalid header
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_HEADER, S_NEXT, S_ADDR, S_WDATA, S_BUS, S_DRAIN} state_e;
  state_e state;

  ipb_trans_hdr_t hdr, resp_hdr, rx_hdr;
  logic [31:0]    addr;
  logic [31:0]    wdata;
  logic [7:0]     cnt;       // words completed
  logic [7:0]     drain_cnt;
  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  logic [TW-1:0]  tmo;

  logic is_write, is_incr, hdr_ok, strobe, ack, err, timeout;

  assign rx_hdr   = ipb_trans_hdr_t'(rx_data);
  assign is_write = hdr.type_id[0];
  assign is_incr  = !hdr.type_id[1];
  assign hdr_ok   = (rx_hdr.version == IPB_VERSION) && (rx_hdr.info == INFO_REQUEST) &&
                    (rx_hdr.type_id[3:2] == 2'b00);

  assign strobe  = (state == S_BUS) && (is_write || !tx_full);
  assign ack     = strobe && ipb_in.ack;
  assign err     = strobe && !ipb_in.ack && ipb_in.err;
  assign timeout = strobe && !ipb_in.ack && !ipb_in.err && (tmo == TW'(TIMEOUT - 1));

  assign ipb_out = '{addr: addr, wdata: wdata, write: is_write, strobe: strobe};

  always_comb begin
    rx_next = 1'b0;
    unique case (state)
      S_NEXT:  rx_next = rx_ready;
      S_ADDR:  rx_next = rx_ready;
      S_WDATA: rx_next = rx_ready;
      S_DRAIN: rx_next = rx_ready;
      default: rx_next = 1'b0;
    endcase
  end

  always_comb begin
    tx_we   = 1'b0;
    tx_data = resp_hdr;
    if (state == S_HEADER) begin
      tx_we = !tx_full;
    end else if (ack && !is_write) begin
      tx_we   = 1'b1;
      tx_data = ipb_in.rdata;
    end
  end

  assign busy = (state != S_IDLE);

  function automatic ipb_trans_hdr_t make_resp(ipb_trans_hdr_t h, logic [7:0] n, logic [3:0] info);
    ipb_trans_hdr_t r;
    r          = h;
    r.version  = IPB_VERSION;
    r.words    = n;
    r.info     = info;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      hdr       <= '0;
      resp_hdr  <= '0;
      addr      <= '0;
      wdata     <= '0;
      cnt       <= '0;
      drain_cnt <= '0;
      tmo       <= '0;
      hdr_err   <= 1'b0;
    end else begin
      hdr_err <= 1'b0;
      unique case (state)
        S_IDLE:   if (rx_ready) state <= S_HEADER;
        S_HEADER: if (!tx_full) state <= S_NEXT;
        S_NEXT: begin
          if (!rx_ready) begin
            state <= S_IDLE;
          end else if (!hdr_ok) begin
            hdr_err <= 1'b1;
            state   <= S_IDLE;
          end else begin
            hdr   <= rx_hdr;
            cnt   <= '0;
            state <= S_ADDR;
          end
        end
        S_ADDR: if (rx_ready) begin
          addr <= rx_data;
          if (hdr.words == 8'd0) begin
            resp_hdr <= make_resp(hdr, 8'd0, INFO_OK);
            state    <= S_HEADER;
          end else begin
            state <= is_write ? S_WDATA : S_BUS;
          end
        end
        S_WDATA: if (rx_ready) begin
          wdata <= rx_data;
          tmo   <= '0;
          state <= S_BUS;
        end
        S_BUS: begin
          if (strobe) tmo <= tmo + 1'b1;
          if (ack) begin
            tmo <= '0;
            cnt <= cnt + 1'b1;
            if (is_incr) addr <= addr + 1'b1;
            if (cnt + 8'd1 == hdr.words) begin
              resp_hdr <= make_resp(hdr, hdr.words, INFO_OK);
              state    <= S_HEADER;
            end else if (is_write) begin
              state <= S_WDATA;
            end
          end else if (err || timeout) begin
            tmo      <= '0;
            resp_hdr <= make_resp(hdr, cnt,
                          err ? (is_write ? INFO_WR_BUS_ERR : INFO_RD_BUS_ERR)
                              : (is_write ? INFO_WR_TIMEOUT : INFO_RD_TIMEOUT));
            if (is_write && (hdr.words - cnt > 8'd1)) begin
              drain_cnt <= hdr.words - cnt - 8'd1;
              state     <= S_DRAIN;
            end else begin
              state <= S_HEADER;
            end
          end
        end
        S_DRAIN: if (rx_ready) begin
          drain_cnt <= drain_cnt - 1'b1;
          if (drain_cnt == 8'd1) state <= S_HEADER;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // IPbus rule: the strobe, once raised, stays high until ack or err.
  a_strobe_held: assert property (@(posedge clk) disable iff (rst)
    (strobe && !ipb_in.ack && !ipb_in.err && !timeout) |=> strobe);

endmodule
