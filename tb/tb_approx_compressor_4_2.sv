// Testbench for approx_compressor_4_2: applies all 16 input combinations and
// compares Carry and Sum with the published truth table of the approximate
// 4-2 compressor. Also checks that five rows differ from the exact count of
// ones, each by exactly one, and that all-zero inputs give zero.
module tb_approx_compressor_4_2;
  import approx_ref_pkg::*;

  logic x1, x2, x3, x4, sum, carry;
  int checks = 0, failures = 0, wrong_rows = 0;

  approx_compressor_4_2 dut (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .sum(sum), .carry(carry)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int d;
      {x1, x2, x3, x4} = 4'(v);
      #1;
      checks++;
      if ({carry, sum} !== C42_TABLE[v]) begin
        failures++;
        $display("FAIL x=%b: got C,S=%b%b expected %b", 4'(v), carry, sum, C42_TABLE[v]);
      end
      d = int'({carry, sum}) - $countones(4'(v));
      if (d != 0) wrong_rows++;
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        $display("FAIL x=%b: error %0d larger than one", 4'(v), d);
      end
    end
    checks++;
    if (wrong_rows != 5) begin
      failures++;
      $display("FAIL: %0d approximated rows, expected 5", wrong_rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
