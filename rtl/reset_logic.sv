// reset_logic: reset generator for the IPbus slaves and for the USB control
// interface.
//
// Two 5-bit stretch counters run on the IPbus clock. The IPbus-side counter
// starts on the board reset button (sys_rstn low) or on a soft reset
// request; the interface counter starts on the button or on a "nuke"
// request. A counter advances on every cycle its request is present or it
// is not zero, so once started it runs until it rolls over to zero; its
// reset output is high for the whole run (32 cycles for a single-cycle
// request). The button acts asynchronously: the hardware reset is high for
// as long as sys_rstn is low, and the stretch follows its release. The
// counters have no reset of their own (as in the original firmware): from
// an arbitrary power-up value they reach zero within 31 cycles.
//
// Outputs: rst_ipb resets the IPbus slaves, rst_if the FT245 master, the
// two buffers and the transactor. Both are synchronous to clk on release.
module reset_logic #(
  parameter int unsigned CTR_BITS = 5
) (
  input  logic clk,        // IPbus clock
  input  logic sys_rstn,   // board reset button, active low, asynchronous
  input  logic soft_rst,   // request from the control register
  input  logic nuke,       // interface reset request from the control register
  output logic rst_ipb,
  output logic rst_if
);
  logic                ipb_rst_hw;
  logic [CTR_BITS-1:0] rctr_ipb, rctr_if;
  logic                long_rst_ipb, long_rst_if;

  // hardware reset flag: set while the button is held, cleared on the
  // first clock after its release
  always_ff @(posedge clk or negedge sys_rstn) begin
    if (!sys_rstn) ipb_rst_hw <= 1'b1;
    else           ipb_rst_hw <= 1'b0;
  end

  assign long_rst_ipb = (rctr_ipb != '0);
  assign long_rst_if  = (rctr_if  != '0);

  always_ff @(posedge clk) begin
    if (soft_rst || ipb_rst_hw || long_rst_ipb) rctr_ipb <= rctr_ipb + 1'b1;
    if (nuke     || ipb_rst_hw || long_rst_if)  rctr_if  <= rctr_if  + 1'b1;
  end

  assign rst_ipb = ipb_rst_hw || long_rst_ipb;
  assign rst_if  = ipb_rst_hw || long_rst_if;

endmodule
