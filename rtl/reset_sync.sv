// reset_sync: carries an active-high reset into another clock domain.
// Asserts asynchronously with rst_in and releases two dst_clk edges after
// rst_in falls, so every flop of the destination domain leaves reset on the
// same edge.
module reset_sync (
  input  logic dst_clk,
  input  logic rst_in,
  output logic rst_out
);
  logic [1:0] q;
  always_ff @(posedge dst_clk or posedge rst_in) begin
    if (rst_in) q <= 2'b11;
    else        q <= {q[0], 1'b0};
  end
  assign rst_out = q[1];
endmodule
