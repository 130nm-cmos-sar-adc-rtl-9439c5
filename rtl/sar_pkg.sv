// sar_pkg: constants shared by the SAR ADC control logic and its behavioural
// analog models.
//
// RESOLUTION is the converter's bit count R (8 in the designed converter).
// The state of the control logic is R "decision" bits plus ceil(log2 R)
// "layer" bits; layer_width() returns that second count.  VREF_MV is the
// conversion reference in millivolts (800 mV in the designed converter).
// Capacitor weights of the binary-weighted DAC are given by cap_weight():
// capacitor 0 is a unit terminating capacitor, capacitor i >= 1 weighs
// 2^(i-1) units, so the array totals 2^(R-1) units (64C,32C,...,2C,C,C for
// R = 8).
package sar_pkg;

  localparam int  RESOLUTION = 8;
  localparam real VREF_MV    = 800.0;

  // Number of layer-counter bits: the next integer not below log2(R).
  function automatic int layer_width(int r);
    return (r <= 2) ? 1 : $clog2(r);
  endfunction

  // Weight, in unit capacitors, of capacitor i of an R-bit DAC.
  function automatic int cap_weight(int i);
    return (i == 0) ? 1 : (1 << (i - 1));
  endfunction

endpackage
