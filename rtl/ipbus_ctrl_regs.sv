// ipbus_ctrl_regs: control and status register slave of the IPbus.
//
// Registers (address bits [1:0]):
//   0 control  write: bit 0 = soft reset of the IPbus slaves,
//                     bit 1 = "nuke", reset of the USB control interface.
//              Both bits are self-clearing: a write of 1 gives a one-cycle
//              request to the reset logic. Reads return 0.
//   1 status   read-only, the status_i input (interface error flags).
//   2 scratch  read/write, for bus tests.
//   3 id       read-only, FW_ID.
// Zero-wait slave: ack is the strobe. The soft-reset and nuke bits are the
// ones the reset logic expects; their positions, the status and scratch
// registers and the ID are this design's choices.
module ipbus_ctrl_regs
  import ipbus_pkg::*;
#(
  parameter logic [31:0] FW_ID = 32'h5043_5444    // "PCTD"
) (
  input  logic        clk,
  input  logic        rst,
  input  ipb_wbus_t   ipb_in,
  output ipb_rbus_t   ipb_out,
  input  logic [31:0] status_i,
  output logic        soft_rst,
  output logic        nuke
);
  logic [31:0] scratch;
  logic        wr;

  assign wr = ipb_in.strobe && ipb_in.write;

  always_ff @(posedge clk) begin
    if (rst) begin
      scratch  <= '0;
      soft_rst <= 1'b0;
      nuke     <= 1'b0;
    end else begin
      soft_rst <= wr && (ipb_in.addr[1:0] == 2'd0) && ipb_in.wdata[0];
      nuke     <= wr && (ipb_in.addr[1:0] == 2'd0) && ipb_in.wdata[1];
      if (wr && (ipb_in.addr[1:0] == 2'd2)) scratch <= ipb_in.wdata;
    end
  end

  always_comb begin
    ipb_out     = '{rdata: '0, ack: ipb_in.strobe, err: 1'b0};
    unique case (ipb_in.addr[1:0])
      2'd1:    ipb_out.rdata = status_i;
      2'd2:    ipb_out.rdata = scratch;
      2'd3:    ipb_out.rdata = FW_ID;
      default: ipb_out.rdata = '0;
    endcase
  end

endmodule
