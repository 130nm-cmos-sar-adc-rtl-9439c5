// logic_network: combinational decoder from the control-logic state to the
// switch controls of the two capacitive DACs.
//
// Inputs are the R decision bits of the shift register and the layer count
// (R + ceil(log2 R) bits, 11 for R = 8) plus the Sample line.  Outputs are,
// for each DAC, a Ref_i and a Gnd_i per capacitor i (16 per DAC for R = 8).
// Ref_i = 1 puts the bottom plate of capacitor i on VREF/2, Gnd_i = 1 puts it
// on ground; they are never both 1.
//
// Switching strategy (monotonic, one capacitor moves per decision):
//   * Sample phase: every Ref_i and Gnd_i is 0, the DACs' own Sample switches
//     hold the bottom plates (DAC1 at VREF/2, DAC2 on the input).
//   * First comparison (layer 0): every Ref_i = 1, Gnd_i = 0; the comparator
//     then compares the input with VREF/2 and produces the MSB.
//   * Once result bit i (i >= 1) has been decided, capacitor i of one DAC is
//     moved from VREF/2 to ground: in DAC2 (the input side) when the bit is 0,
//     Ref_i = bit, Gnd_i = not bit; in DAC1 (the reference side) when the bit
//     is 1.  This moves the comparison threshold up or down by 2^(i-1) LSB,
//     i.e. half of the previous step.  Capacitor 0 is never switched.
//
// Decoding: during layer m (m decisions made) bit i of the result is known
// when m + i >= R, and then sits in decision bit m + i - R of the shift
// register (the newest decision is in bit 0).
//
// The rule for the input-side DAC follows the description of the converter;
// the mirror rule for the reference-side DAC, the all-zero Sample encoding
// and the exact capacitor-to-bit mapping are this design's reading of the
// two-DAC architecture.  Purely combinational, no clock.
module logic_network #(
  parameter int R  = sar_pkg::RESOLUTION,
  parameter int CW = sar_pkg::layer_width(R)
) (
  input  logic          sample,
  input  logic [R-1:0]  state_bits,
  input  logic [CW-1:0] layer,
  output logic [R-1:0]  dac1_ref,
  output logic [R-1:0]  dac1_gnd,
  output logic [R-1:0]  dac2_ref,
  output logic [R-1:0]  dac2_gnd
);

  always_comb begin
    dac1_ref = '0;
    dac1_gnd = '0;
    dac2_ref = '0;
    dac2_gnd = '0;
    if (!sample) begin
      for (int i = 0; i < R; i++) begin
        // Position of result bit i in the shift register, if decided.
        automatic int  pos     = int'(layer) + i - R;
        automatic bit  decided = (i >= 1) && (pos >= 0);
        automatic bit  b       = decided ? state_bits[pos] : 1'b1;
        dac2_ref[i] = !decided || b;
        dac2_gnd[i] = decided && !b;
        dac1_ref[i] = !decided || !b;
        dac1_gnd[i] = decided && b;
      end
    end
  end

  // A capacitor's bottom plate may never be tied to VREF/2 and ground at once.
  always_comb begin
    assert ((dac1_ref & dac1_gnd) == '0) else $error("DAC1 Ref/Gnd short");
    assert ((dac2_ref & dac2_gnd) == '0) else $error("DAC2 Ref/Gnd short");
  end

endmodule
