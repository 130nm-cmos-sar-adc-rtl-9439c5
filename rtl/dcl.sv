// dcl: Digital Control Logic of the SAR ADC, built without a sequencer or a
// code register.
//
// The binary search is run as a state machine whose state is the R decision
// bits of shift_register plus the ceil(log2 R) bits of layer_counter: the
// decision bits start at all ones and receive one comparator outcome per
// clock, while the counter tells which layer of the search tree has been
// reached.  This encoding is not the smallest possible (R+log2 R bits for
// 2^R - 1 tree nodes) but its next-state logic is only a shift and an
// increment.  logic_network decodes the state into DAC switch controls and
// output_register_bank captures the finished word.
//
// Timing (R = 8): one Sample cycle followed by R comparison cycles, so a
// conversion takes R + 1 clocks (12.5 kHz / 9 = 1.39 kS/s).  sample must be
// high for exactly one clock every R + 1 clocks.  At the rising edge that
// ends the Sample cycle the state returns to the root (all ones, layer 0)
// and data_out takes the previous conversion's word; at each of the next R
// rising edges one decision (comp, MSB first) is shifted in.  data_out
// therefore shows a conversion's result from one clock after the start of
// the following Sample cycle, for one conversion period.
//
// Ports: clk, sample, comp (comparator decision, 1 = input above threshold),
// data_out (result word, MSB in bit R-1), dac1_ref/dac1_gnd and
// dac2_ref/dac2_gnd (switch controls of the two DACs), state_bits and layer
// (the state, for observation).
module dcl #(
  parameter int R  = sar_pkg::RESOLUTION,
  parameter int CW = sar_pkg::layer_width(R)
) (
  input  logic          clk,
  input  logic          sample,
  input  logic          comp,
  output logic [R-1:0]  data_out,
  output logic [R-1:0]  dac1_ref,
  output logic [R-1:0]  dac1_gnd,
  output logic [R-1:0]  dac2_ref,
  output logic [R-1:0]  dac2_gnd,
  output logic [R-1:0]  state_bits,
  output logic [CW-1:0] layer
);

  shift_register #(.R(R)) u_shift (
    .clk   (clk),
    .sample(sample),
    .comp  (comp),
    .bits  (state_bits)
  );

  layer_counter #(.CW(CW)) u_count (
    .clk   (clk),
    .sample(sample),
    .count (layer)
  );

  logic_network #(.R(R), .CW(CW)) u_logic (
    .sample    (sample),
    .state_bits(state_bits),
    .layer     (layer),
    .dac1_ref  (dac1_ref),
    .dac1_gnd  (dac1_gnd),
    .dac2_ref  (dac2_ref),
    .dac2_gnd  (dac2_gnd)
  );

  output_register_bank #(.R(R)) u_out (
    .clk     (clk),
    .sample  (sample),
    .bits_in (state_bits),
    .data_out(data_out)
  );

endmodule
