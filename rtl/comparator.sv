// comparator: behavioural model (not synthesizable) of the dynamic latch
// comparator of the SAR ADC.
//
// The circuit is a clocked regenerative latch: it is reset while its clock is
// low and resolves the sign of its differential input when the clock rises.
// The model decides at each rising edge of clk_cmp and holds the decision
// until the next one:  out = 1 when vp_mv + OFFSET_MV > vn_mv.  vp is the
// DAC1 node (Z, "+" input) and vn the DAC2 node (Y, "-" input).  OFFSET_MV is
// an input-referred offset, 0 for an ideal comparator.  Noise, metastability
// and kickback are not modelled.  Holding the decision between evaluations
// (instead of returning to the reset level) is this model's choice, so that
// the control logic may sample it at any later clock edge; the converter
// drives clk_cmp with the inverted system clock, so a decision is made half a
// cycle after the DACs switch and is captured half a cycle later.
//
// Ports: clk_cmp (evaluation clock), vp_mv / vn_mv (inputs, mV), out
// (decision, 1 = vp above vn).
module comparator #(
  parameter real OFFSET_MV = 0.0
) (
  input  logic clk_cmp,
  input  real  vp_mv,
  input  real  vn_mv,
  output logic out
);

  always_ff @(posedge clk_cmp) begin
    out <= (vp_mv + OFFSET_MV) > vn_mv;
  end

endmodule
