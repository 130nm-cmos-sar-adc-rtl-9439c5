// tb_dcl: self-checking test of the digital control logic.
// Part 1 (R = 4): every path through the 4-bit search tree is walked and
// the six state bits (four decision bits, then the two counter bits with the
// counter LSB first) are compared, node by node, with the state codes of the
// 4-bit state transition diagram (111100 at the root ... 111111 at the last
// leaf).
// Part 2 (R = 8): conversions are run with a random comparator stream, one
// Sample cycle plus eight decision cycles each.  The word on data_out must
// be the eight decisions, first one as MSB; it must appear exactly at the
// edge that ends the next Sample cycle (conversion period 9 clocks) and hold
// until the following one.  In layer 0 every Ref control must be on.
module tb_dcl;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- R = 4 instance ----------------
  logic       s4, c4;
  logic [3:0] out4, st4, r41, g41, r42, g42;
  logic [1:0] ly4;

  dcl #(.R(4), .CW(2)) dut4 (
    .clk(clk), .sample(s4), .comp(c4), .data_out(out4),
    .dac1_ref(r41), .dac1_gnd(g41), .dac2_ref(r42), .dac2_gnd(g42),
    .state_bits(st4), .layer(ly4)
  );

  // State codes as printed in the state diagram, left to right.
  function automatic string node_code(int layer_no, int path);
    string l2[2] = '{"011110", "111110"};
    string l3[4] = '{"001101", "101101", "011101", "111101"};
    string l4[8] = '{"000111", "100111", "010111", "110111",
                     "001111", "101111", "011111", "111111"};
    case (layer_no)
      1: return "111100";
      2: return l2[path];
      3: return l3[path];
      default: return l4[path];
    endcase
  endfunction

  function automatic string state_string();
    return $sformatf("%b%b%b%b%b%b", st4[0], st4[1], st4[2], st4[3], ly4[0], ly4[1]);
  endfunction

  // ---------------- R = 8 instance ----------------
  logic       s8, c8;
  logic [7:0] out8, st8, r81, g81, r82, g82;
  logic [2:0] ly8;

  dcl dut8 (
    .clk(clk), .sample(s8), .comp(c8), .data_out(out8),
    .dac1_ref(r81), .dac1_gnd(g81), .dac2_ref(r82), .dac2_gnd(g82),
    .state_bits(st8), .layer(ly8)
  );

  initial begin
    logic [7:0] word, prev_word;
    // Part 1
    s8 = 1'b1;
    c8 = 1'b0;
    for (int path = 0; path < 8; path++) begin
      @(negedge clk);
      s4 = 1'b1;
      c4 = 1'b0;
      @(negedge clk);
      s4 = 1'b0;
      checks++;
      if (state_string() != node_code(1, 0)) begin
        failures++;
        $display("root: %s", state_string());
      end
      for (int k = 0; k < 3; k++) begin
        c4 = path[2 - k];
        @(negedge clk);
        checks++;
        if (state_string() != node_code(k + 2, path >> (2 - k))) begin
          failures++;
          $display("path %0d layer %0d: state %s expected %s", path, k + 2,
                   state_string(), node_code(k + 2, path >> (2 - k)));
        end
      end
    end
    // Part 2
    @(negedge clk);
    s8 = 1'b1;
    @(negedge clk);               // state now at the root
    prev_word = out8;
    for (int conv = 0; conv < 300; conv++) begin
      s8 = 1'b0;
      #1;
      checks++;
      if (ly8 != 3'd0 || st8 != 8'hFF || r81 != 8'hFF || r82 != 8'hFF) begin
        failures++;
        $display("conversion %0d: not at root in layer 0", conv);
      end
      word = 8'($urandom);
      for (int k = 7; k >= 0; k--) begin
        c8 = word[k];
        @(negedge clk);
        checks++;
        if (out8 !== prev_word) begin
          failures++;
          $display("conversion %0d: data_out changed early", conv);
        end
      end
      s8 = 1'b1;                  // Sample cycle of the next conversion
      c8 = $urandom_range(0, 1) != 0;
      @(negedge clk);
      checks++;
      if (out8 !== word) begin
        failures++;
        $display("conversion %0d: data_out %b expected %b", conv, out8, word);
      end
      prev_word = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
