// layer_counter: binary counter of the layer of the search tree the
// conversion has reached (the "layer" half of the control logic state).
//
// It has ceil(log2 R) bits.  The Sample phase clears it to 0, the root of the
// tree; each comparison clock adds one, so during the k-th comparison
// (k = 1..R) it reads k-1.  After the R-th comparison it wraps back to 0
// (for R a power of two), the value the next Sample phase also loads.
//
// The stages are d_register cells.  They are clocked together from clk with a
// synchronous clear through their D inputs: a single-clock counter with the
// same count sequence as a ripple counter of toggling registers, chosen here
// so the whole control logic shares one clock edge.
//
// Ports: clk, sample (synchronous clear), count (current layer, LSB in
// count[0]).
module layer_counter #(
  parameter int CW = sar_pkg::layer_width(sar_pkg::RESOLUTION)
) (
  input  logic          clk,
  input  logic          sample,
  output logic [CW-1:0] count
);

  logic [CW-1:0] next;

  always_comb begin
    next = sample ? '0 : count + CW'(1);
  end

  for (genvar k = 0; k < CW; k++) begin : g_stage
    d_register u_reg (.clk(clk), .d(next[k]), .q(count[k]));
  end

endmodule
