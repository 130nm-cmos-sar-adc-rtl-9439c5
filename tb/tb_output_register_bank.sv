// tb_output_register_bank: self-checking test of the output register bank.
// The word on bits_in changes every cycle; data_out must take it only at a
// rising edge where sample is high and hold it through the other cycles.
module tb_output_register_bank;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sample;
  logic [7:0] bits_in, data_out, expected;
  int         checks = 0, failures = 0, loads = 0;

  always #5 clk = ~clk;

  output_register_bank #(.R(8)) dut (
    .clk(clk), .sample(sample), .bits_in(bits_in), .data_out(data_out)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample  = 1'b1;
    bits_in = 8'h00;
    @(posedge clk);
    expected = 8'h00;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sample  = ($urandom_range(0, 8) == 0);
      bits_in = 8'($urandom);
      @(posedge clk);
      if (sample) begin
        expected = bits_in;
        loads++;
      end
      #1;
      checks++;
      if (data_out !== expected) begin
        failures++;
        $display("cycle %0d: data_out=%h expected %h", n, data_out, expected);
      end
    end
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
