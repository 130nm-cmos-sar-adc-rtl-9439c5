// tb_sine_enob: dynamic test of the converter with a 70 Hz test tone.
// The input is 400 mV + 400 mV * sin(2*pi*f*t) (800 mVpp, VREF = 800 mV),
// sampled every nine clocks of a 12.5 kHz clock (fs = 1.389 kS/s); 2048
// conversions are run.  f is set to 103 * fs / 2048 = 69.85 Hz, the nearest
// to 70 Hz with a prime number of periods in the record, so that the record
// is coherent and no window is needed.
// Every word must equal floor(vin/LSB) limited to 0..255 (a level exactly on
// a threshold gives the lower code).  The words are turned back into
// voltages by an ideal DAC (V = code * VREF / 256), and the spectrum of that
// staircase is evaluated at the tone and its first eleven harmonics (with
// aliasing folded back).  From it:
//   SNR   = 10*log10(P_tone / P_noise), noise = everything but DC, tone and
//           harmonics (by Parseval, from the total AC power);
//   THD   = 10*log10(P_harmonics / P_tone)            (dBc, negative);
//   SINAD = -10*log10(10^(THD/10) + 10^(-SNR/10));
//   ENOB  = (SINAD - 1.76) / 6.02.
// An ideal 8-bit quantiser reaches about 49.9 dB and 8 bits; the test
// requires ENOB above 7.5 bits and the SINAD from the formula above to
// agree with the SINAD measured directly (tone against everything else).
module tb_sine_enob;
  timeunit 1us; timeprecision 1ns;

  localparam real LSB_MV  = 800.0 / 256.0;
  localparam real PI      = 3.14159265358979323846;
  localparam int  N       = 2048;
  localparam int  CYCLES  = 103;
  localparam int  HARMONICS = 11;

  logic       clk = 1'b0;
  logic       sample;
  real        vin;
  logic [7:0] data_out, state_bits;
  logic [2:0] layer;
  logic       comp_out;
  int         checks = 0, failures = 0;
  real        x[N];

  always #40 clk = ~clk;

  sar_adc dut (
    .clk(clk), .sample(sample), .vin_mv(vin), .data_out(data_out),
    .comp_out(comp_out), .state_bits(state_bits), .layer(layer));

  initial begin
    repeat ((N + 4) * 9) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Single-sided power of DFT bin k (0 < k < N/2) of the record x.
  function automatic real bin_power(int k);
    real re, im;
    re = 0.0;
    im = 0.0;
    for (int n = 0; n < N; n++) begin
      re += x[n] * $cos(2.0 * PI * real'(k) * real'(n) / real'(N));
      im -= x[n] * $sin(2.0 * PI * real'(k) * real'(n) / real'(N));
    end
    return 2.0 * (re * re + im * im) / (real'(N) * real'(N));
  endfunction

  initial begin
    real v, prev_v, mean, p_total, p_tone, p_harm, p_noise;
    real snr, thd, sinad, sinad_direct, enob;
    int  expected, code, k;
    sample = 1'b0;
    vin = 0.0;
    prev_v = 0.0;
    @(posedge clk);
    #1;
    for (int n = 0; n <= N; n++) begin
      v = 400.0 + 400.0 * $sin(2.0 * PI * real'(CYCLES) * real'(n) / real'(N));
      vin = v;
      sample = 1'b1;
      @(posedge clk);
      #1;
      sample = 1'b0;
      if (n > 0) begin
        code = int'(data_out);
        expected = (prev_v <= 0.0) ? 0 : int'($ceil(prev_v / LSB_MV)) - 1;
        if (expected > 255) expected = 255;
        checks++;
        if (code != expected) begin
          failures++;
          $display("sample %0d: vin %f code %0d expected %0d", n - 1, prev_v, code, expected);
        end
        x[n-1] = real'(code) * LSB_MV;
      end
      prev_v = v;
      repeat (8) begin
        @(posedge clk);
        #1;
      end
    end
    // Spectrum of the reconstructed staircase.
    mean = 0.0;
    for (int n = 0; n < N; n++) mean += x[n];
    mean /= real'(N);
    p_total = 0.0;
    for (int n = 0; n < N; n++) p_total += (x[n] - mean) * (x[n] - mean);
    p_total /= real'(N);
    p_tone = bin_power(CYCLES);
    p_harm = 0.0;
    for (int h = 2; h <= HARMONICS + 1; h++) begin
      k = (h * CYCLES) % N;
      if (k > N / 2) k = N - k;
      if (k != 0 && k != N / 2) p_harm += bin_power(k);
    end
    p_noise = p_total - p_tone - p_harm;
    snr   = 10.0 * $log10(p_tone / p_noise);
    thd   = 10.0 * $log10(p_harm / p_tone);
    sinad = -10.0 * $log10($pow(10.0, thd / 10.0) + $pow(10.0, -snr / 10.0));
    sinad_direct = 10.0 * $log10(p_tone / (p_total - p_tone));
    enob  = (sinad - 1.76) / 6.02;
    $display("tone %f Hz: SNR = %f dB, THD = %f dBc, SINAD = %f dB (direct %f dB), ENOB = %f bits",
             real'(CYCLES) * 12500.0 / 9.0 / real'(N), snr, thd, sinad, sinad_direct, enob);
    checks++;
    if (enob < 7.5) begin
      failures++;
      $display("ENOB below 7.5 bits");
    end
    checks++;
    if (sinad - sinad_direct > 0.01 || sinad_direct - sinad > 0.01) begin
      failures++;
      $display("SINAD from SNR and THD disagrees with the direct measurement");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
