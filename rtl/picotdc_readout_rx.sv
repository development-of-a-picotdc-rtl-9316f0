// picotdc_readout_rx: receiver for one PicoTDC 8-bit parallel read-out
// port, with an IPbus read-out register.
//
// The PicoTDC sends 32-bit frames as four bytes, most significant byte
// first, on an 8-bit port; the sync line, configured to mark the first byte
// of each frame, is high with that byte. When the chip has no data it sends
// idle frames (every byte 0xD0). The receiver, clocked by the port's byte
// clock rx_clk, aligns on sync, assembles each frame and drops idle frames
// (management frames whose top nibble is 0xD); every other frame (hits,
// headers, trailers, group separators) is written into a dual-clock FIFO of
// FIFO_DEPTH words towards the IPbus clock domain. A frame arriving while the
// FIFO is full is lost and sets a sticky overflow flag. A frame cut short
// by an early sync is discarded.
//
// Registers (address bit [0]):
//   0 data    read: pop the oldest frame; the idle word 0xD0D0D0D0 when the
//             FIFO is empty. Reading it with a non-incrementing block read
//             drains the FIFO at one word per bus cycle.
//   1 status  [0] FIFO empty, [1] overflow (cleared by reset)
// Only the "sync marks the first byte" mode is supported; the FIFO depth,
// the register map and the empty-read value are this design's choices.
module picotdc_readout_rx
  import ipbus_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024
) (
  // read-out port
  input  logic       rx_clk,
  input  logic       rx_rst,
  input  logic [7:0] rx_data,
  input  logic       rx_sync,
  // IPbus
  input  logic       clk,
  input  logic       rst,
  input  ipb_wbus_t  ipb_in,
  output ipb_rbus_t  ipb_out
);
  logic [23:0] shreg;
  logic [1:0]  nbytes;     // bytes of the current frame received so far
  logic        in_frame;
  logic        push, full, overflow_rx;
  logic [31:0] frame;

  assign frame = {shreg, rx_data};
  assign push  = in_frame && !rx_sync && (nbytes == 2'd3) && (frame[31:28] != TDC_IDLE_BYTE[7:4]);

  always_ff @(posedge rx_clk) begin
    if (rx_rst) begin
      shreg       <= '0;
      nbytes      <= '0;
      in_frame    <= 1'b0;
      overflow_rx <= 1'b0;
    end else begin
      if (rx_sync) begin
        shreg    <= {16'd0, rx_data};
        nbytes   <= 2'd1;
        in_frame <= 1'b1;
      end else if (in_frame) begin
        shreg  <= {shreg[15:0], rx_data};
        nbytes <= nbytes + 1'b1;
        if (nbytes == 2'd3) in_frame <= 1'b0;
      end
      if (push && full) overflow_rx <= 1'b1;
    end
  end

  logic        rd_en, empty;
  logic [31:0] rd_data;
  logic [1:0]  ovf_sync;

  dc_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(rx_clk), .wr_rst(rx_rst), .wr_en(push), .wr_data(frame), .wr_full(full),
    .rd_clk(clk), .rd_rst(rst), .rd_en, .rd_data, .rd_empty(empty)
  );

  always_ff @(posedge clk) begin
    if (rst) ovf_sync <= '0;
    else     ovf_sync <= {ovf_sync[0], overflow_rx};
  end

  assign rd_en = ipb_in.strobe && !ipb_in.write && !ipb_in.addr[0] && !empty;

  always_comb begin
    ipb_out = '{rdata: '0, ack: ipb_in.strobe, err: 1'b0};
    if (ipb_in.addr[0]) ipb_out.rdata = {30'd0, ovf_sync[1], empty};
    else                ipb_out.rdata = empty ? TDC_IDLE_WORD : rd_data;
  end

endmodule
