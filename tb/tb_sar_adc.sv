// tb_sar_adc: end-to-end self-checking test of the complete 8-bit SAR ADC at
// its default parameters (R = 8, VREF = 800 mV, ideal comparator).
// A 12.5 kHz clock is used and Sample is raised for one clock every nine
// clocks (1.39 kS/s).  Each conversion gets a random input between -20 mV
// and 820 mV, so that both ends of the range saturate now and then.  The
// expected word is worked out from the input alone:
// floor(vin / 3.125 mV), limited to 0..255 (inputs within 1 uV of a code
// boundary are moved off it).  Checked: every word; that it appears exactly
// ten clock edges after Sample rose and holds until the next update; that
// the state returns to the root every conversion.  Counted, and required to
// happen at least once: comparator decisions of both signs in every layer,
// capacitors switched in DAC1 and in DAC2, the layer counter wrapping,
// negative and positive full-scale saturation.
module tb_sar_adc;
  timeunit 1us; timeprecision 1ns;

  localparam real LSB_MV = 800.0 / 256.0;
  localparam int  CONVERSIONS = 2000;

  logic       clk = 1'b0;
  logic       sample;
  real        vin;
  logic [7:0] data_out, state_bits;
  logic       comp_out;
  logic [2:0] layer;
  int         checks = 0, failures = 0;

  // Mechanism counters.
  int comp_ones[8], comp_zeros[8];
  int dac1_switches = 0, dac2_switches = 0, wraps = 0, sat_low = 0, sat_high = 0;

  always #40 clk = ~clk;

  sar_adc dut (
    .clk(clk), .sample(sample), .vin_mv(vin), .data_out(data_out),
    .comp_out(comp_out), .state_bits(state_bits), .layer(layer)
  );

  initial begin
    repeat (CONVERSIONS * 9 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Decisions, DAC switching and counter wrap, observed at each clock edge.
  logic [2:0] last_layer;
  always @(posedge clk) begin
    if (!sample) begin
      if (comp_out) comp_ones[layer]++;
      else          comp_zeros[layer]++;
      if (dut.u_dcl.dac1_gnd != '0) dac1_switches++;
      if (dut.u_dcl.dac2_gnd != '0) dac2_switches++;
      if (layer == 3'd7) wraps++;
    end
  end

  function automatic int ideal_code(real v);
    int c;
    if (v < 0.0) return 0;
    c = int'($floor(v / LSB_MV));
    return (c > 255) ? 255 : c;
  endfunction

  initial begin
    real        v;
    int         expected, prev_expected;
    logic [7:0] held;
    sample = 1'b0;
    vin = 0.0;
    prev_expected = -1;
    @(posedge clk);
    #1;
    for (int n = 0; n <= CONVERSIONS; n++) begin
      // Start conversion n: Sample for one clock.
      v = real'($urandom_range(0, 840000)) / 1000.0 - 20.0;
      if (v >= 0.0 && v / LSB_MV - $floor(v / LSB_MV) < 1.0e-6) v += 0.001;
      vin = v;
      sample = 1'b1;
      held = data_out;
      @(posedge clk);             // end of the Sample cycle: result of n-1 loads
      #1;
      sample = 1'b0;
      if (prev_expected >= 0) begin
        checks++;
        if (int'(data_out) != prev_expected) begin
          failures++;
          $display("conversion %0d: data_out=%0d expected %0d", n - 1, data_out, prev_expected);
        end
      end
      checks++;
      if (layer != 3'd0 || state_bits != 8'hFF) begin
        failures++;
        $display("conversion %0d: state not at the root after Sample", n);
      end
      expected = ideal_code(v);
      if (v < 0.0) sat_low++;
      if (v >= 800.0) sat_high++;
      held = data_out;
      // Eight comparison cycles: the output must hold.
      repeat (8) begin
        @(posedge clk);
        #1;
      end
      checks++;
      if (data_out !== held) begin
        failures++;
        $display("conversion %0d: data_out changed during the conversion", n);
      end
      prev_expected = expected;
    end
    for (int m = 0; m < 8; m++) begin
      if (comp_ones[m] == 0 || comp_zeros[m] == 0) begin
        failures++;
        $display("layer %0d: decisions 1/0 = %0d/%0d", m, comp_ones[m], comp_zeros[m]);
      end
    end
    if (dac1_switches == 0) begin failures++; $display("DAC1 never switched"); end
    if (dac2_switches == 0) begin failures++; $display("DAC2 never switched"); end
    if (wraps == 0)         begin failures++; $display("counter never wrapped"); end
    if (sat_low == 0)       begin failures++; $display("no negative saturation"); end
    if (sat_high == 0)      begin failures++; $display("no positive saturation"); end
    $display("decisions 1 per layer: %0d %0d %0d %0d %0d %0d %0d %0d", comp_ones[0], comp_ones[1],
             comp_ones[2], comp_ones[3], comp_ones[4], comp_ones[5], comp_ones[6], comp_ones[7]);
    $display("DAC1 switch cycles %0d, DAC2 switch cycles %0d, wraps %0d, saturations %0d/%0d",
             dac1_switches, dac2_switches, wraps, sat_low, sat_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
