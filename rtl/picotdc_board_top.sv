// picotdc_board_top: FPGA firmware of the PicoTDC evaluation board, with
// the FT601Q USB 3.0 bridge as control and read-out interface.
//
// Data flow. The host writes bare IPbus transactions over USB. The FT245
// master (FTDI clock domain, 100 MHz, falling edge) moves them into InBuff,
// a 1024 x 32 dual-clock FIFO. The IPbus transactor (40 MHz) executes them
// on the on-chip IPbus through the fabric and writes read data and status
// headers to OutBuff, a 65536 x 32 dual-clock FIFO, which the FT245 master
// empties towards the host when the chip asks for data.
//
// IPbus slaves (address = slave << 8 | register):
//   0x000 control/status registers (soft reset, interface reset "nuke")
//   0x100 I2C master for the PicoTDC configuration bus
//   0x200 I2C master for LIROC A (with LIROC power-on / reset pins)
//   0x300 I2C master for LIROC B
//   0x400 LIROC analog-probe setup (both LIROCs)
//   0x500 PicoTDC A read-out, 0x600 PicoTDC B read-out
// A 6-bit divider of the IPbus clock gives the LIROC I2C slave-core clock
// (625 kHz, lr_clk_sm_i2c).
//
// Resets: the reset logic stretches the board button, soft reset and nuke
// into rst_ipb (IPbus slaves) and rst_if (transactor, buffers, FT245
// master); each is synchronised into the other clock domains. rst_ipb and
// rst_if are therefore used twice on purpose: as synchronous resets by the
// 40 MHz logic, and as the asynchronous assert input of the reset
// synchronisers of the FTDI and PicoTDC clock domains (which release
// synchronously to their own clock).
//
// Ports: pads are split into input, output and output-enable signals;
// open-drain lines (I2C) give *_oe = 1 to pull the line low. Index 0 of the
// LIROC arrays is LIROC A, index 1 LIROC B; likewise PicoTDC A and B.
// status_o: [0] FT245 read timeout, [1] FT245 write timeout, [2] invalid
// header seen, [3] transactor busy. The bundle of slaves, the address map,
// the PicoTDC receivers and the status word are this design's choices
// around the USB interface, reset logic and LIROC slaves of the board.
module picotdc_board_top
  import ipbus_pkg::*;
#(
  parameter int unsigned INBUFF_DEPTH  = 1024,
  parameter int unsigned OUTBUFF_DEPTH = 65536,
  parameter int unsigned DIV_BITS      = 6,
  parameter int unsigned TDC_FIFO_DEPTH = 1024
) (
  input  logic        ipb_clk,         // 40 MHz
  input  logic        sys_rstn,        // reset button
  // FT601Q, FT245 synchronous mode
  input  logic        ft_clk,          // 100 MHz from the chip
  input  logic        ft_txe_n,
  input  logic        ft_rxf_n,
  output logic        ft_wr_n,
  output logic        ft_rd_n,
  output logic        ft_oe_n,
  input  logic [31:0] ft_data_i,
  output logic [31:0] ft_data_o,
  output logic        ft_data_oe,
  output logic [3:0]  ft_be_o,
  output logic        ft_be_oe,
  // PicoTDC configuration I2C
  output logic        tdc_scl_oe,
  output logic        tdc_sda_oe,
  input  logic        tdc_sda_i,
  // PicoTDC read-out ports
  input  logic [1:0]  tdc_rx_clk,
  input  logic [7:0]  tdc_rx_data [2],
  input  logic [1:0]  tdc_rx_sync,
  // LIROC slow control
  output logic [1:0]  lr_scl_oe,
  output logic [1:0]  lr_sda_oe,
  input  logic [1:0]  lr_sda_i,
  output logic [1:0]  lr_power_on,
  output logic [1:0]  lr_reset_n,
  output logic        lr_clk_sm_i2c,
  // LIROC analog-probe shift registers
  output logic [1:0]  lr_sr_clk,
  output logic [1:0]  lr_sr_rst,
  output logic [1:0]  lr_srin,
  input  logic [1:0]  lr_srout,
  // status
  output logic [3:0]  status_o
);
  // ---------------- clocks and resets ----------------
  logic ft_clk_n;
  assign ft_clk_n = ~ft_clk;       // FTDI-side logic works on the falling edge

  logic soft_rst, nuke, rst_ipb, rst_if, rst_ft;
  logic [1:0] rst_tdc;

  reset_logic u_reset (
    .clk(ipb_clk), .sys_rstn, .soft_rst, .nuke, .rst_ipb, .rst_if
  );
  reset_sync u_rst_ft (.dst_clk(ft_clk_n), .rst_in(rst_if), .rst_out(rst_ft));

  // ---------------- USB control interface ----------------
  logic        ib_wr_en, ib_full, ib_rd_en, ib_empty;
  logic [31:0] ib_wr_data, ib_rd_data;
  logic        ob_wr_en, ob_full, ob_rd_en, ob_empty;
  logic [31:0] ob_wr_data, ob_rd_data;
  logic        rd_timeout, wr_timeout;

  ft245_master u_ft245 (
    .clk(ft_clk_n), .rst(rst_ft),
    .txe_n(ft_txe_n), .rxf_n(ft_rxf_n), .wr_n(ft_wr_n), .rd_n(ft_rd_n), .oe_n(ft_oe_n),
    .data_i(ft_data_i), .data_o(ft_data_o), .data_oe(ft_data_oe),
    .be_o(ft_be_o), .be_oe(ft_be_oe),
    .ib_wr_en, .ib_wr_data, .ib_full,
    .ob_rd_en, .ob_rd_data, .ob_empty,
    .rd_timeout, .wr_timeout
  );

  dc_fifo #(.WIDTH(32), .DEPTH(INBUFF_DEPTH)) u_inbuff (
    .wr_clk(ft_clk_n), .wr_rst(rst_ft), .wr_en(ib_wr_en), .wr_data(ib_wr_data), .wr_full(ib_full),
    .rd_clk(ipb_clk), .rd_rst(rst_if), .rd_en(ib_rd_en), .rd_data(ib_rd_data), .rd_empty(ib_empty)
  );

  dc_fifo #(.WIDTH(32), .DEPTH(OUTBUFF_DEPTH)) u_outbuff (
    .wr_clk(ipb_clk), .wr_rst(rst_if), .wr_en(ob_wr_en), .wr_data(ob_wr_data), .wr_full(ob_full),
    .rd_clk(ft_clk_n), .rd_rst(rst_ft), .rd_en(ob_rd_en), .rd_data(ob_rd_data), .rd_empty(ob_empty)
  );

  ipb_wbus_t ipb_m_w;
  ipb_rbus_t ipb_m_r;
  logic      hdr_err, tr_busy;

  ipbus_transactor u_transactor (
    .clk(ipb_clk), .rst(rst_if),
    .rx_data(ib_rd_data), .rx_ready(!ib_empty), .rx_next(ib_rd_en),
    .tx_data(ob_wr_data), .tx_we(ob_wr_en), .tx_full(ob_full),
    .ipb_out(ipb_m_w), .ipb_in(ipb_m_r),
    .hdr_err, .busy(tr_busy)
  );

  // ---------------- IPbus ----------------
  ipb_wbus_t ipb_s_w [N_SLAVES];
  ipb_rbus_t ipb_s_r [N_SLAVES];

  ipbus_fabric #(.NSLV(N_SLAVES)) u_fabric (
    .ipb_from_master(ipb_m_w), .ipb_to_master(ipb_m_r),
    .ipb_to_slaves(ipb_s_w), .ipb_from_slaves(ipb_s_r)
  );

  // interface error flags, brought into the IPbus domain
  logic [1:0] tmo_s1, tmo_s2;
  logic       hdr_err_seen;
  always_ff @(posedge ipb_clk) begin
    if (rst_ipb) begin
      tmo_s1       <= '0;
      tmo_s2       <= '0;
      hdr_err_seen <= 1'b0;
    end else begin
      tmo_s1 <= {wr_timeout, rd_timeout};
      tmo_s2 <= tmo_s1;
      if (hdr_err) hdr_err_seen <= 1'b1;
    end
  end
  assign status_o = {tr_busy, hdr_err_seen, tmo_s2};

  ipbus_ctrl_regs u_ctrl (
    .clk(ipb_clk), .rst(rst_ipb),
    .ipb_in(ipb_s_w[SLV_CTRL]), .ipb_out(ipb_s_r[SLV_CTRL]),
    .status_i({28'd0, status_o}), .soft_rst, .nuke
  );

  logic tdc_pwr_unused, tdc_rstn_unused;
  ipbus_i2c_master u_i2c_tdc (
    .clk(ipb_clk), .rst(rst_ipb),
    .ipb_in(ipb_s_w[SLV_I2C_TDC]), .ipb_out(ipb_s_r[SLV_I2C_TDC]),
    .scl_oe(tdc_scl_oe), .sda_oe(tdc_sda_oe), .sda_i(tdc_sda_i),
    .power_on(tdc_pwr_unused), .reset_n(tdc_rstn_unused)
  );

  ipbus_i2c_master u_i2c_lra (
    .clk(ipb_clk), .rst(rst_ipb),
    .ipb_in(ipb_s_w[SLV_I2C_LRA]), .ipb_out(ipb_s_r[SLV_I2C_LRA]),
    .scl_oe(lr_scl_oe[0]), .sda_oe(lr_sda_oe[0]), .sda_i(lr_sda_i[0]),
    .power_on(lr_power_on[0]), .reset_n(lr_reset_n[0])
  );

  ipbus_i2c_master u_i2c_lrb (
    .clk(ipb_clk), .rst(rst_ipb),
    .ipb_in(ipb_s_w[SLV_I2C_LRB]), .ipb_out(ipb_s_r[SLV_I2C_LRB]),
    .scl_oe(lr_scl_oe[1]), .sda_oe(lr_sda_oe[1]), .sda_i(lr_sda_i[1]),
    .power_on(lr_power_on[1]), .reset_n(lr_reset_n[1])
  );

  liroc_analog_setup #(.DIV_BITS(DIV_BITS)) u_analog (
    .clk(ipb_clk), .rst(rst_ipb),
    .ipb_in(ipb_s_w[SLV_ANALOG]), .ipb_out(ipb_s_r[SLV_ANALOG]),
    .sr_clk(lr_sr_clk), .sr_rst(lr_sr_rst), .srin(lr_srin), .srout(lr_srout)
  );

  logic div_rise_unused, div_fall_unused;
  clk_divider #(.DIV_BITS(DIV_BITS)) u_i2c_core_clk (
    .clk(ipb_clk), .rst(rst_ipb), .clk_out(lr_clk_sm_i2c),
    .rise_tick(div_rise_unused), .fall_tick(div_fall_unused)
  );

  for (genvar t = 0; t < 2; t++) begin : g_tdc
    reset_sync u_rst_tdc (.dst_clk(tdc_rx_clk[t]), .rst_in(rst_ipb), .rst_out(rst_tdc[t]));
    picotdc_readout_rx #(.FIFO_DEPTH(TDC_FIFO_DEPTH)) u_rx (
      .rx_clk(tdc_rx_clk[t]), .rx_rst(rst_tdc[t]),
      .rx_data(tdc_rx_data[t]), .rx_sync(tdc_rx_sync[t]),
      .clk(ipb_clk), .rst(rst_ipb),
      .ipb_in(ipb_s_w[SLV_TDC_A + t]), .ipb_out(ipb_s_r[SLV_TDC_A + t])
    );
  end

endmodule
