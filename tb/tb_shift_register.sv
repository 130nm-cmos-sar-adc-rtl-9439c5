// tb_shift_register: self-checking test of the decision shift register.
// A reference word is updated alongside the block: all ones while sample is
// high, otherwise shifted right with the comparator bit entering bit 0.
// Random sample and comparator patterns are applied for R = 8 and R = 4.
module tb_shift_register;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       sample, comp;
  logic [7:0] bits8;
  logic [3:0] bits4;
  logic [7:0] ref8;
  logic [3:0] ref4;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  shift_register #(.R(8)) dut8 (.clk(clk), .sample(sample), .comp(comp), .bits(bits8));
  shift_register #(.R(4)) dut4 (.clk(clk), .sample(sample), .comp(comp), .bits(bits4));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = 1'b1;
    comp   = 1'b0;
    @(posedge clk);
    ref8 = 8'hFF;
    ref4 = 4'hF;
    #1;
    checks++;
    if (bits8 !== ref8 || bits4 !== ref4) begin
      failures++;
      $display("load: bits8=%b bits4=%b", bits8, bits4);
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sample = ($urandom_range(0, 9) == 0);
      comp   = $urandom_range(0, 1) != 0;
      @(posedge clk);
      if (sample) begin
        ref8 = 8'hFF;
        ref4 = 4'hF;
      end else begin
        ref8 = {ref8[6:0], comp};
        ref4 = {ref4[2:0], comp};
      end
      #1;
      checks++;
      if (bits8 !== ref8 || bits4 !== ref4) begin
        failures++;
        $display("cycle %0d: bits8=%b exp %b bits4=%b exp %b", n, bits8, ref8, bits4, ref4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
