// clk_divider: clock divider by 2**DIV_BITS (6 bits: 40 MHz -> 625 kHz).
//
// A free-running DIV_BITS-bit counter on the IPbus clock. Its most
// significant bit, registered, is the divided clock clk_out (50 % duty).
// Two single-cycle enables mark where clk_out is about to change:
// rise_tick is high in the cycle before clk_out rises, fall_tick in the
// cycle before it falls. Logic in the fast domain uses them to change data
// after a falling edge and to sample before a rising edge. Synchronous
// reset, clk_out low after reset.
module clk_divider #(
  parameter int unsigned DIV_BITS = 6
) (
  input  logic clk,
  input  logic rst,
  output logic clk_out,
  output logic rise_tick,
  output logic fall_tick
);
  logic [DIV_BITS-1:0] cnt;

  assign rise_tick = (cnt == {1'b0, {(DIV_BITS-1){1'b1}}});
  assign fall_tick = (cnt == '1);
  assign clk_out   = cnt[DIV_BITS-1];

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

endmodule
