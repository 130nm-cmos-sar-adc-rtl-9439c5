// tb_comparator: self-checking test of the comparator model.
// Random input pairs are applied between clock edges; the output must
// change only at rising edges of clk_cmp and then equal vp + offset > vn.
// An ideal instance and one with a +1 mV offset are checked.
module tb_comparator;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  real  vp, vn;
  logic out0, out1;
  logic exp0, exp1;
  int   checks = 0, failures = 0, ones = 0;

  always #5 clk = ~clk;

  comparator                       dut0 (.clk_cmp(clk), .vp_mv(vp), .vn_mv(vn), .out(out0));
  comparator #(.OFFSET_MV(1.0))    dut1 (.clk_cmp(clk), .vp_mv(vp), .vn_mv(vn), .out(out1));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vp = 0.0;
    vn = 0.0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      vp = real'($urandom_range(0, 800000)) / 1000.0;
      // Keep some pairs within the offset of each other.
      if ($urandom_range(0, 1) != 0) vn = vp + real'($urandom_range(0, 1800)) / 1000.0 - 0.9;
      else                           vn = real'($urandom_range(0, 800000)) / 1000.0;
      exp0 = vp > vn;
      exp1 = vp + 1.0 > vn;
      @(posedge clk);
      #1;
      checks++;
      if (out0 !== exp0 || out1 !== exp1) begin
        failures++;
        $display("vp=%f vn=%f out=%b/%b expected %b/%b", vp, vn, out0, out1, exp0, exp1);
      end
      if (out0) ones++;
      // Inputs change mid-cycle: output must hold.
      vp = vn - 5.0 + 10.0 * real'(out0 ? 0 : 1);
      #2;
      checks++;
      if (out0 !== exp0) begin
        failures++;
        $display("output changed between clock edges");
      end
    end
    if (ones == 0 || ones == 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
