// ft245_master: bus master for the FT601Q USB bridge in FT245 synchronous
// (single channel) mode.
//
// The FT601Q provides the bus clock (100 MHz) and both sides work on its
// falling edge; this module is clocked by the inverted bus clock, so each
// rising edge of clk is a falling edge of the FTDI clock.
//
// Two loops leave the IDLE state:
//   * Master read (host -> board). When the chip pulls RXF_N low and InBuff
//     is not full, the FSM enters a one-cycle turn-around (OE_N low, the
//     data bus released), then the read phase with RD_N low. Every cycle in
//     which RXF_N is low and InBuff has room, the word on DATA is written
//     into InBuff. The loop ends when the chip raises RXF_N, or with a
//     read timeout when InBuff stays full for TIMEOUT cycles.
//   * Master write (board -> host). When the chip pulls TXE_N low and
//     OutBuff holds data, the FSM drives WR_N low together with the OutBuff
//     read enable, with the OutBuff output word on DATA. The loop ends when
//     the chip raises TXE_N, or with a write timeout when OutBuff stays
//     empty for TIMEOUT cycles while the host still asks for words.
// WR_N, RD_N, the InBuff write enable and the OutBuff read enable are
// decoded combinationally from the state and the live TXE_N/RXF_N and
// buffer flags, so they drop in the same cycle the chip ends the transfer
// or a buffer flag rises. A master read is served before a master write
// when both are requested (this design's choice). Byte enables are driven
// all-ones: every transfer is whole 32-bit words. The data bus is split
// into data_i, data_o and data_oe; the pad tri-state is left to the top.
// Timeout flags are sticky until reset. Synchronous active-high reset.
module ft245_master #(
  parameter int unsigned TIMEOUT = 1024        // clk cycles
) (
  input  logic        clk,           // inverted FTDI bus clock
  input  logic        rst,
  // FT245 bus
  input  logic        txe_n,
  input  logic        rxf_n,
  output logic        wr_n,
  output logic        rd_n,
  output logic        oe_n,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  output logic        data_oe,
  output logic [3:0]  be_o,
  output logic        be_oe,
  // InBuff write port
  output logic        ib_wr_en,
  output logic [31:0] ib_wr_data,
  input  logic        ib_full,
  // OutBuff read port (first word fall through)
  output logic        ob_rd_en,
  input  logic [31:0] ob_rd_data,
  input  logic        ob_empty,
  // status
  output logic        rd_timeout,
  output logic        wr_timeout
);
  typedef enum logic [1:0] {S_IDLE, S_MWR, S_RD_TA, S_MRD} state_e;
  state_e state;

  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  logic [TW-1:0] tmo_cnt;

  logic wr_beat, rd_beat;
  assign wr_beat = (state == S_MWR) && !txe_n && !ob_empty;
  assign rd_beat = (state == S_MRD) && !rxf_n && !ib_full;

  assign wr_n       = !wr_beat;
  assign ob_rd_en   = wr_beat;
  assign data_o     = ob_rd_data;
  assign data_oe    = (state == S_MWR);
  assign be_o       = 4'hF;
  assign be_oe      = (state == S_MWR);
  assign oe_n       = !((state == S_RD_TA) || (state == S_MRD));
  assign rd_n       = !rd_beat;
  assign ib_wr_en   = rd_beat;
  assign ib_wr_data = data_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      tmo_cnt    <= '0;
      rd_timeout <= 1'b0;
      wr_timeout <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          tmo_cnt <= '0;
          if (!rxf_n && !ib_full)       state <= S_RD_TA;
          else if (!txe_n && !ob_empty) state <= S_MWR;
        end
        S_MWR: begin
          if (txe_n) begin
            state   <= S_IDLE;
          end else if (ob_empty) begin
            if (tmo_cnt == TW'(TIMEOUT - 1)) begin
              wr_timeout <= 1'b1;
              state      <= S_IDLE;
            end
            tmo_cnt <= tmo_cnt + 1'b1;
          end else begin
            tmo_cnt <= '0;
          end
        end
        S_RD_TA: state <= S_MRD;
        S_MRD: begin
          if (rxf_n) begin
            state   <= S_IDLE;
          end else if (ib_full) begin
            if (tmo_cnt == TW'(TIMEOUT - 1)) begin
              rd_timeout <= 1'b1;
              state      <= S_IDLE;
            end
            tmo_cnt <= tmo_cnt + 1'b1;
          end else begin
            tmo_cnt <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The bus is never driven by both sides: OE_N low (chip drives) and
  // data_oe high (FPGA drives) are exclusive.
  a_no_contention: assert property (@(posedge clk) disable iff (rst) !(data_oe && !oe_n));

endmodule
