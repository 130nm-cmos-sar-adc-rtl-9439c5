// shift_register: the R-bit chain that records the comparator decisions of
// one conversion (the "decision" half of the control logic state).
//
// Every comparison shifts the word right by one place and puts the new
// comparator outcome into the left-most bit, bits[0].  In the initial state
// of a conversion all bits are 1.  After k comparisons bits[0] holds the most
// recent decision, bits[k-1] the first one (the MSB of the result) and bits
// [R-1:k] are still 1; after R comparisons bits[j] is result bit j, so the
// finished word can be copied out unchanged.
//
// Timing: one shift per rising clk edge.  While sample is high the chain is
// loaded with all ones instead, so the state after the Sample phase is the
// root of the search tree.  The loading through the D inputs, and the use of
// a single clock edge for every stage, are this design's choices; the stages
// themselves are the plain D-type cells of d_register.
//
// Ports: clk, sample (load all ones), comp (comparator decision, sampled at
// the rising edge), bits (the R stored decisions; bits[0] is the newest).
module shift_register #(
  parameter int R = sar_pkg::RESOLUTION
) (
  input  logic         clk,
  input  logic         sample,
  input  logic         comp,
  output logic [R-1:0] bits
);

  logic [R-1:0] d;

  always_comb begin
    d[0] = sample | comp;
    for (int k = 1; k < R; k++) begin
      d[k] = sample | bits[k-1];
    end
  end

  for (genvar k = 0; k < R; k++) begin : g_stage
    d_register u_reg (.clk(clk), .d(d[k]), .q(bits[k]));
  end

endmodule
