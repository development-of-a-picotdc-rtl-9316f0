// ipbus_i2c_master: IPbus slave wrapping the I2C master logic, with the
// register set of the LIROC I2C master.
//
// Registers (address bits [2:0]):
//   0 prescaler   [15:0] SCL half-period length, [31:16] data setup time,
//                 both in IPbus clock cycles (read/write)
//   1 device_addr [6:0] 7-bit slave address for the next transfer (r/w)
//   2 rd          write: start a read of wdata[8:0] bytes into the RX FIFO;
//                 read: last length written
//   3 wr          write: start a one-byte write of the next TX FIFO byte
//   4 wr_data     write: push wdata[7:0] into the TX FIFO
//   5 rd_data     read: pop one byte from the RX FIFO ([7:0]); 0 if empty
//   6 status      [0] busy, [1] slave did not acknowledge,
//                 [2] RX FIFO empty, [3] TX FIFO empty (read-only)
//   7 pwr_rst     [1] LIROC power-on, [0] LIROC reset (active low) (r/w)
// A start written while a transfer is running is ignored: software polls
// status bit 0 between frames. TX and RX FIFOs are single-clock FIFOs of
// FIFO_DEPTH bytes. The register numbers and fields follow the LIROC
// master's register table; the status bit assignment, the FIFO depth and
// the other reset values are this design's choices. The prescaler resets
// to an SCL half period of 640 cycles with the data setup at half of it:
// 31.25 kHz, one twentieth of the 625 kHz slow-control clock a LIROC needs
// next to SCL, as that chip requires. Zero-wait slave: ack is the
// strobe, so a run of non-incrementing reads of rd_data pops one byte per
// bus cycle.
module ipbus_i2c_master
  import ipbus_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic      clk,
  input  logic      rst,
  input  ipb_wbus_t ipb_in,
  output ipb_rbus_t ipb_out,
  // I2C lines (open drain)
  output logic      scl_oe,
  output logic      sda_oe,
  input  logic      sda_i,
  // LIROC slow-control pins
  output logic      power_on,
  output logic      reset_n
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic [31:0] prescaler;
  logic [6:0]  dev_addr;
  logic [8:0]  rd_len;
  logic [1:0]  pwr_rst;
  logic        start_wr, start_rd;

  logic        wr, rd;
  logic [2:0]  ra;
  assign ra = ipb_in.addr[2:0];
  assign wr = ipb_in.strobe &&  ipb_in.write;
  assign rd = ipb_in.strobe && !ipb_in.write;

  logic [7:0]  tx_data, rx_wdata, rx_rdata;
  logic        tx_empty, tx_full, tx_pop, rx_push, rx_empty, rx_full;
  logic        busy, ack_err;
  logic [CW-1:0] tx_count, rx_count;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst,
    .wr_en(wr && ra == 3'd4), .wr_data(ipb_in.wdata[7:0]),
    .rd_en(tx_pop), .rd_data(tx_data),
    .empty(tx_empty), .full(tx_full), .count(tx_count)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst,
    .wr_en(rx_push), .wr_data(rx_wdata),
    .rd_en(rd && ra == 3'd5), .rd_data(rx_rdata),
    .empty(rx_empty), .full(rx_full), .count(rx_count)
  );

  i2c_master_fsm u_fsm (
    .clk, .rst,
    .scl_len(prescaler[15:0]), .data_setup(prescaler[31:16]),
    .dev_addr, .start_wr, .start_rd, .rd_len,
    .tx_data, .tx_empty, .tx_pop,
    .rx_data(rx_wdata), .rx_push,
    .busy, .ack_err,
    .scl_oe, .sda_oe, .sda_i
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      prescaler <= {16'd320, 16'd640};   // 31.25 kHz SCL: 1/20 of the 625 kHz LIROC core clock
      dev_addr  <= '0;
      rd_len    <= '0;
      pwr_rst   <= 2'b00;
      start_wr  <= 1'b0;
      start_rd  <= 1'b0;
    end else begin
      start_wr <= wr && (ra == 3'd3) && !busy;
      start_rd <= wr && (ra == 3'd2) && !busy;
      if (wr) begin
        unique case (ra)
          3'd0: prescaler <= ipb_in.wdata;
          3'd1: dev_addr  <= ipb_in.wdata[6:0];
          3'd2: rd_len    <= ipb_in.wdata[8:0];
          3'd7: pwr_rst   <= ipb_in.wdata[1:0];
          default: ;
        endcase
      end
    end
  end

  assign power_on = pwr_rst[1];
  assign reset_n  = pwr_rst[0];

  always_comb begin
    ipb_out = '{rdata: '0, ack: ipb_in.strobe, err: 1'b0};
    unique case (ra)
      3'd0: ipb_out.rdata = prescaler;
      3'd1: ipb_out.rdata = {25'd0, dev_addr};
      3'd2: ipb_out.rdata = {23'd0, rd_len};
      3'd5: ipb_out.rdata = rx_empty ? 32'd0 : {24'd0, rx_rdata};
      3'd6: ipb_out.rdata = {28'd0, tx_empty, rx_empty, ack_err, busy || start_wr || start_rd};
      3'd7: ipb_out.rdata = {30'd0, pwr_rst};
      default: ipb_out.rdata = '0;
    endcase
  end

endmodule
