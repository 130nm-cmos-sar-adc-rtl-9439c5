// tb_sar_adc_4bit: the converter built at 4-bit resolution, the size used to
// explain the state encoding (six state bits: four decisions and a 2-bit
// layer counter).  VREF = 800 mV, so one LSB is 50 mV, and a conversion
// takes five clocks (one Sample clock, four decisions).  500 random inputs
// from -50 to 850 mV are converted; each word must equal floor(vin / LSB)
// limited to 0..15 and appear one conversion period after its Sample clock.
// Every one of the 16 codes must occur.
module tb_sar_adc_4bit;
  timeunit 1us; timeprecision 1ns;

  localparam int  R      = 4;
  localparam real LSB_MV = 800.0 / 16.0;

  logic         clk = 1'b0;
  logic         sample;
  real          vin;
  logic [R-1:0] data_out, state_bits;
  logic [1:0]   layer;
  logic         comp_out;
  int           checks = 0, failures = 0;
  bit           seen[16];

  always #40 clk = ~clk;

  sar_adc #(.R(R), .CW(2)) dut (
    .clk(clk), .sample(sample), .vin_mv(vin), .data_out(data_out),
    .comp_out(comp_out), .state_bits(state_bits), .layer(layer));

  initial begin
    repeat (600 * (R + 1)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    int  expected, prev_expected, missing;
    sample = 1'b0;
    vin = 0.0;
    prev_expected = -1;
    @(posedge clk);
    #1;
    for (int n = 0; n <= 500; n++) begin
      v = real'($urandom_range(0, 900000)) / 1000.0 - 50.0;
      if (v >= 0.0 && v / LSB_MV - $floor(v / LSB_MV) < 1.0e-6) v += 0.001;
      vin = v;
      sample = 1'b1;
      @(posedge clk);
      #1;
      sample = 1'b0;
      if (prev_expected >= 0) begin
        checks++;
        if (int'(data_out) != prev_expected) begin
          failures++;
          $display("conversion %0d: data_out=%0d expected %0d", n - 1, data_out, prev_expected);
        end
        seen[data_out] = 1'b1;
      end
      expected = (v < 0.0) ? 0 : int'($floor(v / LSB_MV));
      if (expected > 15) expected = 15;
      prev_expected = expected;
      repeat (R) begin
        @(posedge clk);
        #1;
      end
    end
    missing = 0;
    foreach (seen[k]) if (!seen[k]) missing++;
    checks++;
    if (missing != 0) begin
      failures++;
      $display("%0d codes never produced", missing);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
