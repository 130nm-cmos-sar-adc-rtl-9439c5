// cap_dac: behavioural model (not synthesizable) of one binary-weighted
// switched-capacitor DAC of the SAR ADC; the converter uses two of them.
//
// The array has R capacitors: capacitor i >= 1 weighs 2^(i-1) unit
// capacitors and capacitor 0 one unit, 2^(R-1) units in all (64C ... 2C, C,
// C for R = 8).  Their top plates join at the output node (Z for DAC1, Y for
// DAC2).  While sample is high the top plate is held at VRS = VREF/2 and every
// bottom plate is on the sampled voltage: the analog input vin_mv for the
// input-side DAC (SAMPLES_VIN = 1, DAC2), VREF/2 for the reference-side DAC
// (SAMPLES_VIN = 0, DAC1).  When sample falls the top plate floats and keeps
// its charge.  Afterwards the bottom plate of capacitor i sits on VREF/2 when
// ref_sw[i] is 1, on ground when gnd_sw[i] is 1, and on the sampled voltage
// when neither is set; by charge conservation
//     vtop = VRS + sum_i w_i * (v_bottom_i - v_sampled) / 2^(R-1).
// Capacitor mismatch, parasitics, charge injection and settling are not
// modelled: the output follows the switches at once.  The value of VRS and
// the meaning of the two switch controls are this model's reading of the
// DAC schematic.
//
// Ports: sample, ref_sw / gnd_sw (one pair per capacitor), vin_mv (analog
// input, mV), vtop_mv (top-plate voltage, mV).
module cap_dac #(
  parameter int  R           = sar_pkg::RESOLUTION,
  parameter real VREF_MV     = sar_pkg::VREF_MV,
  parameter bit  SAMPLES_VIN = 1'b1
) (
  input  logic         sample,
  input  logic [R-1:0] ref_sw,
  input  logic [R-1:0] gnd_sw,
  input  real          vin_mv,
  output real          vtop_mv
);

  localparam real VRS_MV  = VREF_MV / 2.0;
  localparam real C_TOTAL = real'(1 << (R - 1));

  // Bottom-plate voltage at the end of the sampling phase.
  real v_sampled;

  always_latch begin
    if (sample) begin
      v_sampled = SAMPLES_VIN ? vin_mv : VREF_MV / 2.0;
    end
  end

  always_comb begin
    real acc;
    real v_bottom;
    acc = 0.0;
    for (int i = 0; i < R; i++) begin
      if (ref_sw[i]) begin
        v_bottom = VREF_MV / 2.0;
      end else if (gnd_sw[i]) begin
        v_bottom = 0.0;
      end else begin
        v_bottom = v_sampled;
      end
      acc += real'(sar_pkg::cap_weight(i)) * (v_bottom - v_sampled);
    end
    vtop_mv = sample ? VRS_MV : VRS_MV + acc / C_TOTAL;
  end

endmodule
