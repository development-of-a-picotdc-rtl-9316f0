// ipbus_fabric: bus fabric selector connecting the single IPbus master to
// NSLV slaves.
//
// The slave index is taken from address bits [SEL_LSB +: SEL_W]; all
// address bits above that field must be zero. Only the selected slave sees
// the strobe; every slave sees the full address, write flag and data. The
// selected slave's read data, ack and err are returned to the master. A
// strobe to an unmapped address is answered at once with err, so the
// transactor reports a bus error instead of waiting for its timeout.
// Purely combinational: a slave's zero-wait ack reaches the master in the
// same cycle. The field position is this design's own address map.
module ipbus_fabric
  import ipbus_pkg::*;
#(
  parameter int unsigned NSLV    = N_SLAVES,
  parameter int unsigned SEL_LSB = 8,
  parameter int unsigned SEL_W   = 4
) (
  input  ipb_wbus_t ipb_from_master,
  output ipb_rbus_t ipb_to_master,
  output ipb_wbus_t ipb_to_slaves   [NSLV],
  input  ipb_rbus_t ipb_from_slaves [NSLV]
);
  logic [SEL_W-1:0] sel;
  logic             mapped;

  assign sel    = ipb_from_master.addr[SEL_LSB +: SEL_W];
  assign mapped = (ipb_from_master.addr[31:SEL_LSB+SEL_W] == '0) && (int'(sel) < NSLV);

  always_comb begin
    for (int i = 0; i < int'(NSLV); i++) begin
      ipb_to_slaves[i]        = ipb_from_master;
      ipb_to_slaves[i].strobe = ipb_from_master.strobe && mapped && (int'(sel) == i);
    end
    ipb_to_master = '{rdata: '0, ack: 1'b0, err: 1'b0};
    if (mapped) begin
      for (int i = 0; i < int'(NSLV); i++)
        if (int'(sel) == i) ipb_to_master = ipb_from_slaves[i];
    end else begin
      ipb_to_master.err = ipb_from_master.strobe;
    end
  end

endmodule
