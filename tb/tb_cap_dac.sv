// tb_cap_dac: self-checking test of the capacitive DAC model.
// An input-side DAC (samples vin) and a reference-side DAC (samples VREF/2)
// are sampled, then random switch patterns are applied.  The expected
// top-plate voltage is worked out by hand: VREF - vin (input side) or VREF/2
// (reference side) with every Ref closed, lowered by w_i * VREF / 256 for
// each capacitor i put on ground (w = 1,1,2,4,...,64), and unchanged when a
// capacitor's switches are both open.  The input changing after sampling
// must not matter.
module tb_cap_dac;
  timeunit 1us; timeprecision 1ns;

  localparam int  R    = 8;
  localparam real VREF = 800.0;

  logic         clk = 1'b0;
  logic         sample;
  logic [R-1:0] ref_sw, gnd_sw;
  real          vin, vy, vz;
  int           checks = 0, failures = 0;

  always #40 clk = ~clk;

  cap_dac #(.R(R), .VREF_MV(VREF), .SAMPLES_VIN(1'b1)) dac2 (
    .sample(sample), .ref_sw(ref_sw), .gnd_sw(gnd_sw), .vin_mv(vin), .vtop_mv(vy));
  cap_dac #(.R(R), .VREF_MV(VREF), .SAMPLES_VIN(1'b0)) dac1 (
    .sample(sample), .ref_sw(ref_sw), .gnd_sw(gnd_sw), .vin_mv(vin), .vtop_mv(vz));

  function automatic real weight(int i);
    return (i == 0) ? 1.0 : real'(1 << (i - 1));
  endfunction

  task automatic check_close(string what, real got, real want);
    checks++;
    if (got - want > 1.0e-6 || want - got > 1.0e-6) begin
      failures++;
      $display("%s: got %f mV expected %f mV", what, got, want);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v_sampled, drop, open_shift2;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      v_sampled = real'($urandom_range(0, 800000)) / 1000.0;
      vin    = v_sampled;
      sample = 1'b1;
      ref_sw = '0;
      gnd_sw = '0;
      #1;
      check_close("sample Y", vy, VREF / 2.0);
      check_close("sample Z", vz, VREF / 2.0);
      sample = 1'b0;
      #1;
      vin = real'($urandom_range(0, 800000)) / 1000.0;  // input moves on
      ref_sw = '1;
      #1;
      check_close("all Ref Y", vy, VREF - v_sampled);
      check_close("all Ref Z", vz, VREF / 2.0);
      // Random pattern: each capacitor on Ref, on ground or floating.
      drop = 0.0;
      open_shift2 = 0.0;
      for (int i = 0; i < R; i++) begin
        case ($urandom_range(0, 2))
          0: begin ref_sw[i] = 1'b1; gnd_sw[i] = 1'b0; end
          1: begin ref_sw[i] = 1'b0; gnd_sw[i] = 1'b1; drop += weight(i) * VREF / 256.0; end
          default: begin
            ref_sw[i] = 1'b0; gnd_sw[i] = 1'b0;
            // Floating on DAC2 keeps the bottom at vin instead of VREF/2.
            open_shift2 += weight(i) * (v_sampled - VREF / 2.0) / 128.0;
          end
        endcase
      end
      #1;
      check_close("pattern Y", vy, VREF - v_sampled - drop + open_shift2);
      check_close("pattern Z", vz, VREF / 2.0 - drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
