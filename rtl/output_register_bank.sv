// output_register_bank: R D-type registers that hold the last finished
// conversion result for the outside world.
//
// The Sample phase that starts a conversion is also the moment the previous
// conversion is complete, so the bank copies the shift register's word while
// sample is high and holds it otherwise.  data_out[j] is result bit j (bit R-1
// is the MSB).  The new word appears one clock after the Sample phase begins
// and stays until the next Sample phase, i.e. for one full conversion period.
//
// The registers are d_register cells sharing the system clock, with sample
// acting as a load enable through their D inputs; clocking the bank directly
// from the Sample line would give the same data one clock earlier, and is not
// done here so that the whole design runs on one clock.
//
// Ports: clk, sample (load enable), bits_in (shift register word), data_out
// (registered result).
module output_register_bank #(
  parameter int R = sar_pkg::RESOLUTION
) (
  input  logic         clk,
  input  logic         sample,
  input  logic [R-1:0] bits_in,
  output logic [R-1:0] data_out
);

  logic [R-1:0] d;

  always_comb begin
    d = sample ? bits_in : data_out;
  end

  for (genvar k = 0; k < R; k++) begin : g_stage
    d_register u_reg (.clk(clk), .d(d[k]), .q(data_out[k]));
  end

endmodule
