// d_register: the single-bit D-type register every chain of the control
// logic is built from.
//
// In silicon this cell is a master-slave pair of transmission-gate latches
// with no set or reset input.  Here it is written as its logical behaviour:
// q takes the value of d at each rising edge of clk and holds it for the rest
// of the cycle.  Choosing the rising edge is this design's choice; the cell
// has no reset, so whoever uses it loads a known value through d (the control
// logic does this during the Sample phase).
//
// Ports: clk (clock), d (data in), q (data out, one clock of latency).
module d_register (
  input  logic clk,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
