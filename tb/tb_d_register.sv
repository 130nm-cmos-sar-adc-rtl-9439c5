// tb_d_register: self-checking test of the D-type register cell.
// Random data is applied each cycle; after every rising edge q must equal
// the d that was present just before that edge, and hold between edges.
module tb_d_register;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic d, q;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  d_register dut (.clk(clk), .d(d), .q(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    d = 1'b0;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      expected = $urandom_range(0, 1) != 0;
      d = expected;
      #1 d = expected;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("cycle %0d: q=%b expected %b", n, q, expected);
      end
      // Change d mid-cycle: q must not follow.
      d = ~expected;
      #2;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("cycle %0d: q followed d between edges", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
