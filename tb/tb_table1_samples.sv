// tb_table1_samples: converts the six reference input samples of the 70 Hz,
// 800 mVpp test tone (537.790, 799.560, 617.310, 374.780, 143.500 and
// 1.120 mV, VREF = 800 mV) and compares the words with the reference table.
// Two converters run side by side:
//   * an ideal one, whose words must equal floor(vin / 3.125 mV) and lie
//     within one code of the reference words (the reference words come from
//     a transistor-level converter and round two of the six samples up);
//   * one whose comparator has an input-referred offset of +0.75 mV, which
//     must reproduce all six reference words exactly (any offset between
//     about +0.22 mV and +1.4 mV does).
// For every word the reconstructed voltage V_A = VREF * sum(b_i / 2^(8-i))
// and the error |vin - V_A| (below one LSB for the ideal converter) are
// printed.  The words must appear after one conversion period.
module tb_table1_samples;
  timeunit 1us; timeprecision 1ns;

  localparam real LSB_MV = 800.0 / 256.0;

  logic       clk = 1'b0;
  logic       sample;
  real        vin;
  logic [7:0] word_ideal, word_offset;
  logic [7:0] st_a, st_b;
  logic [2:0] ly_a, ly_b;
  logic       cmp_a, cmp_b;
  int         checks = 0, failures = 0;

  real        vin_table[6]  = '{537.790, 799.560, 617.310, 374.780, 143.500, 1.120};
  logic [7:0] word_table[6] = '{8'b10101100, 8'b11111111, 8'b11000101,
                                8'b01111000, 8'b00101110, 8'b00000000};

  always #40 clk = ~clk;

  sar_adc ideal (
    .clk(clk), .sample(sample), .vin_mv(vin), .data_out(word_ideal),
    .comp_out(cmp_a), .state_bits(st_a), .layer(ly_a));

  sar_adc #(.COMP_OFFSET_MV(0.75)) offset (
    .clk(clk), .sample(sample), .vin_mv(vin), .data_out(word_offset),
    .comp_out(cmp_b), .state_bits(st_b), .layer(ly_b));

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v_a, err;
    int  ideal_code, diff;
    sample = 1'b0;
    vin = 0.0;
    @(posedge clk);
    #1;
    for (int n = 0; n <= 6; n++) begin
      // Sample cycle of conversion n; at its end conversion n-1 is shown.
      if (n < 6) vin = vin_table[n];
      sample = 1'b1;
      @(posedge clk);
      #1;
      sample = 1'b0;
      if (n > 0) begin
        ideal_code = int'($floor(vin_table[n-1] / LSB_MV));
        if (ideal_code > 255) ideal_code = 255;
        v_a = 0.0;
        for (int i = 0; i < 8; i++) v_a += word_ideal[7-i] ? 800.0 / real'(2 ** (i + 1)) : 0.0;
        err = vin_table[n-1] - v_a;
        if (err < 0.0) err = -err;
        diff = int'(word_ideal) - int'(word_table[n-1]);
        $display("vin %8.3f mV: ideal %b (V_A %7.2f mV, error %4.2f mV), offset %b, table %b",
                 vin_table[n-1], word_ideal, v_a, err, word_offset, word_table[n-1]);
        checks++;
        if (int'(word_ideal) != ideal_code) begin
          failures++;
          $display("  ideal word differs from floor(vin/LSB) = %0d", ideal_code);
        end
        checks++;
        if (diff > 1 || diff < -1 || err >= LSB_MV) begin
          failures++;
          $display("  ideal word more than one code from the table");
        end
        checks++;
        if (word_offset !== word_table[n-1]) begin
          failures++;
          $display("  offset converter does not reproduce the table word");
        end
      end
      repeat (8) begin
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
