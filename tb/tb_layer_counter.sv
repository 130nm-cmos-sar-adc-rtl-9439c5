// tb_layer_counter: self-checking test of the layer counter.
// The 3-bit (R = 8) and 2-bit (R = 4) counters are cleared by sample and must
// then count 0,1,2,... modulo their size, one step per clock.
module tb_layer_counter;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sample;
  logic [2:0] cnt3;
  logic [1:0] cnt2;
  int         ref_count;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  layer_counter #(.CW(3)) dut3 (.clk(clk), .sample(sample), .count(cnt3));
  layer_counter #(.CW(2)) dut2 (.clk(clk), .sample(sample), .count(cnt2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = 1'b1;
    @(posedge clk);
    ref_count = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(cnt3) != ref_count % 8 || int'(cnt2) != ref_count % 4) begin
        failures++;
        $display("cycle %0d: cnt3=%0d cnt2=%0d expected %0d", n, cnt3, cnt2, ref_count);
      end
      sample = ($urandom_range(0, 12) == 0);
      @(posedge clk);
      ref_count = sample ? 0 : ref_count + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
