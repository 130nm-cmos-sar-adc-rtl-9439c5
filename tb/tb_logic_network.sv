// tb_logic_network: self-checking test of the state-to-switch decoder.
// For every 8-bit result word and every layer m, the shift register state
// after m decisions is built, and the switch pattern the block returns is
// turned back into a comparison threshold (in LSB): 128 plus the weight of
// every DAC1 capacitor on ground minus the weight of every DAC2 capacitor on
// ground.  It must equal the trial code of a textbook successive
// approximation at that step: the m decided bits, a 1 in the next position,
// zeros below.  Also checked: all switches open during Sample, all Ref on in
// layer 0, no capacitor tied to both rails, capacitor 0 never switched.
module tb_logic_network;
  timeunit 1ns; timeprecision 1ps;

  localparam int R = 8;

  logic         clk = 1'b0;
  logic         sample;
  logic [R-1:0] state_bits;
  logic [2:0]   layer;
  logic [R-1:0] d1r, d1g, d2r, d2g;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic_network #(.R(R), .CW(3)) dut (
    .sample(sample), .state_bits(state_bits), .layer(layer),
    .dac1_ref(d1r), .dac1_gnd(d1g), .dac2_ref(d2r), .dac2_gnd(d2g)
  );

  function automatic int weight(int i);
    return (i == 0) ? 1 : (1 << (i - 1));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int threshold, trial;
    // Sample phase: every switch open.
    sample = 1'b1;
    state_bits = 8'($urandom);
    layer = 3'($urandom);
    #1;
    checks++;
    if ((d1r | d1g | d2r | d2g) != '0) begin
      failures++;
      $display("sample phase: switches not all open");
    end
    sample = 1'b0;
    for (int word = 0; word < 256; word++) begin
      for (int m = 0; m < R; m++) begin
        // State after m decisions: newest decision in bit 0, ones above.
        for (int j = 0; j < R; j++) begin
          state_bits[j] = (j < m) ? word[R - m + j] : 1'b1;
        end
        layer = 3'(m);
        #1;
        threshold = 128;
        for (int i = 0; i < R; i++) begin
          if (d1g[i]) threshold += weight(i);
          if (d2g[i]) threshold -= weight(i);
        end
        trial = ((word >> (R - m)) << (R - m)) | (1 << (R - 1 - m));
        checks++;
        if (threshold != trial) begin
          failures++;
          $display("word %0d layer %0d: threshold %0d expected %0d", word, m, threshold, trial);
        end
        checks++;
        if ((d1r & d1g) != '0 || (d2r & d2g) != '0 || (d1r ^ d1g) != '1 || (d2r ^ d2g) != '1) begin
          failures++;
          $display("word %0d layer %0d: bad switch pair", word, m);
        end
        checks++;
        if (!d1r[0] || !d2r[0]) begin
          failures++;
          $display("word %0d layer %0d: capacitor 0 switched", word, m);
        end
        if (m == 0) begin
          checks++;
          if (d1r != '1 || d2r != '1) begin
            failures++;
            $display("layer 0: Ref not all on");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
