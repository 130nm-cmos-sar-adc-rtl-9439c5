// tb_ramp_linearity: static linearity test of the converter.
// A slow linear ramp from -2 LSB to VREF + 2 LSB is applied in steps of
// 1/32 LSB, one conversion per step.  From the input levels at which the
// output code changes, the width of every code 1..254 is measured and turned
// into differential non-linearity DNL(k) = width(k)/LSB - 1 and integral
// non-linearity INL(k) = (transition(k) - k*LSB)/LSB.  Checked: the output
// never decreases, no code is missing, every word equals floor(vin/LSB)
// limited to 0..255, |DNL| and |INL| stay within the 1/32 LSB measurement
// step.  The worst values are printed.
module tb_ramp_linearity;
  timeunit 1us; timeprecision 1ns;

  localparam real LSB_MV = 800.0 / 256.0;
  localparam real STEP   = LSB_MV / 32.0;
  localparam int  STEPS  = (256 + 4) * 32;

  logic       clk = 1'b0;
  logic       sample;
  real        vin;
  logic [7:0] data_out, state_bits;
  logic [2:0] layer;
  logic       comp_out;
  int         checks = 0, failures = 0;
  real        first_seen[256];
  bit         seen[256];

  always #40 clk = ~clk;

  sar_adc dut (
    .clk(clk), .sample(sample), .vin_mv(vin), .data_out(data_out),
    .comp_out(comp_out), .state_bits(state_bits), .layer(layer));

  initial begin
    repeat ((STEPS + 4) * 9) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, prev_v, dnl, inl, dnl_max, inl_max;
    int  code, prev_code, expected, missing, worst_code;
    sample = 1'b0;
    vin = 0.0;
    prev_code = 0;
    prev_v = 0.0;
    dnl_max = 0.0;
    inl_max = 0.0;
    worst_code = 0;
    @(posedge clk);
    #1;
    for (int n = 0; n <= STEPS; n++) begin
      v = -2.0 * LSB_MV + real'(n) * STEP + STEP / 2.0;
      vin = v;
      sample = 1'b1;
      @(posedge clk);
      #1;
      sample = 1'b0;
      if (n > 0) begin
        code = int'(data_out);
        expected = (prev_v < 0.0) ? 0 : int'($floor(prev_v / LSB_MV));
        if (expected > 255) expected = 255;
        checks++;
        if (code != expected || code < prev_code) begin
          failures++;
          $display("vin %f: code %0d expected %0d (previous %0d)", prev_v, code, expected, prev_code);
        end
        if (!seen[code]) begin
          seen[code] = 1'b1;
          first_seen[code] = prev_v;
        end
        prev_code = code;
      end
      prev_v = v;
      repeat (8) begin
        @(posedge clk);
        #1;
      end
    end
    missing = 0;
    for (int k = 0; k < 256; k++) if (!seen[k]) missing++;
    checks++;
    if (missing != 0) begin
      failures++;
      $display("%0d missing codes", missing);
    end else begin
      for (int k = 1; k < 255; k++) begin
        dnl = (first_seen[k+1] - first_seen[k]) / LSB_MV - 1.0;
        inl = (first_seen[k] - real'(k) * LSB_MV) / LSB_MV;
        if ((dnl < 0.0 ? -dnl : dnl) > dnl_max) begin
          dnl_max = dnl < 0.0 ? -dnl : dnl;
          worst_code = k;
        end
        if ((inl < 0.0 ? -inl : inl) > inl_max) inl_max = inl < 0.0 ? -inl : inl;
      end
      $display("max |DNL| = %f LSB (code %0d), max |INL| = %f LSB", dnl_max, worst_code, inl_max);
      checks++;
      if (dnl_max > 1.0 / 32.0 + 1.0e-9 || inl_max > 1.0 / 32.0 + 1.0e-9) begin
        failures++;
        $display("linearity outside the measurement step");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
