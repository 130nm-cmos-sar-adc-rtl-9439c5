// sar_adc: the complete successive-approximation ADC, top level (contains
// behavioural analog models, so it is simulatable but not synthesizable).
//
// Two capacitive DACs and a dynamic comparator surround the digital control
// logic (dcl).  DAC2 samples the input, DAC1 samples VREF/2; the comparator
// compares their top plates, Z (DAC1) against Y (DAC2), which after sampling
// amounts to comparing the input with VREF/2.  Each decision then moves one
// capacitor of one DAC to ground, shifting the threshold up or down by half
// the previous step, until all R bits are known.
//
// Timing: sample high for one clk cycle every R + 1 cycles (9 for R = 8, so
// a 12.5 kHz clock gives 1.39 kS/s).  vin_mv is taken while sample is high.
// The word appears on data_out one clock after the following Sample cycle
// starts, i.e. R + 2 clocks after the sample was taken, and holds for one
// conversion period.  An ideal converter gives data_out =
// floor(vin / (VREF / 2^R)), saturated to 0 .. 2^R - 1.
//
// Ports: clk (system clock), sample (Sample phase), vin_mv (analog input in
// mV), data_out (result), comp_out, state_bits, layer (internal state, for
// observation).  COMP_OFFSET_MV sets the comparator offset of the model.
module sar_adc #(
  parameter int  R              = sar_pkg::RESOLUTION,
  parameter real VREF_MV        = sar_pkg::VREF_MV,
  parameter real COMP_OFFSET_MV = 0.0,
  parameter int  CW             = sar_pkg::layer_width(R)
) (
  input  logic          clk,
  input  logic          sample,
  input  real           vin_mv,
  output logic [R-1:0]  data_out,
  output logic          comp_out,
  output logic [R-1:0]  state_bits,
  output logic [CW-1:0] layer
);

  logic [R-1:0] dac1_ref, dac1_gnd, dac2_ref, dac2_gnd;
  real          vz_mv, vy_mv;
  logic         clk_n;

  assign clk_n = ~clk;

  dcl #(.R(R), .CW(CW)) u_dcl (
    .clk       (clk),
    .sample    (sample),
    .comp      (comp_out),
    .data_out  (data_out),
    .dac1_ref  (dac1_ref),
    .dac1_gnd  (dac1_gnd),
    .dac2_ref  (dac2_ref),
    .dac2_gnd  (dac2_gnd),
    .state_bits(state_bits),
    .layer     (layer)
  );

  // DAC1: reference side, node Z.
  cap_dac #(.R(R), .VREF_MV(VREF_MV), .SAMPLES_VIN(1'b0)) u_dac1 (
    .sample (sample),
    .ref_sw (dac1_ref),
    .gnd_sw (dac1_gnd),
    .vin_mv (vin_mv),
    .vtop_mv(vz_mv)
  );

  // DAC2: input side, node Y.
  cap_dac #(.R(R), .VREF_MV(VREF_MV), .SAMPLES_VIN(1'b1)) u_dac2 (
    .sample (sample),
    .ref_sw (dac2_ref),
    .gnd_sw (dac2_gnd),
    .vin_mv (vin_mv),
    .vtop_mv(vy_mv)
  );

  comparator #(.OFFSET_MV(COMP_OFFSET_MV)) u_cmp (
    .clk_cmp(clk_n),
    .vp_mv  (vz_mv),
    .vn_mv  (vy_mv),
    .out    (comp_out)
  );

endmodule
