// liroc_probe_model: behavioural model of one LIROC analog-probe shift
// register, for testbenches. LEN stages; stage 0 takes srin on the rising
// edge of sr_clk, each stage passes its bit to the next one on the same
// edge, and srout shows the last stage, updated on the falling edge of
// sr_clk. sr_rst (active high) clears all stages and srout at once.
// Counts rising edges (n_clk) and reset pulses (n_rst). The stage
// numbering matches the position convention of liroc_analog_setup; the
// edge behaviour follows the document's description of the chip.
module liroc_probe_model #(
  parameter int LEN = 128
) (
  input  logic sr_clk,
  input  logic sr_rst,
  input  logic srin,
  output logic srout
);
  logic [LEN-1:0] sr = '0;
  int n_clk = 0, n_rst = 0;
  initial srout = 1'b0;

  always @(posedge sr_clk or posedge sr_rst) begin
    if (sr_rst) sr <= '0;
    else begin
      sr <= {sr[LEN-2:0], srin};
      n_clk <= n_clk + 1;
    end
  end
  always @(negedge sr_clk or posedge sr_rst) begin
    if (sr_rst) srout <= 1'b0;
    else        srout <= sr[LEN-1];
  end
  always @(posedge sr_rst) n_rst <= n_rst + 1;

  // number of stages holding a 1
  function automatic int ones();
    return $countones(sr);
  endfunction
endmodule
