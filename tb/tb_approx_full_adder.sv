// Testbench for approx_full_adder: applies all eight input combinations and
// compares Carry and Sum with the published truth table of the approximate
// full adder. Also checks that two rows differ from exact addition, each by
// exactly one.
module tb_approx_full_adder;
  import approx_ref_pkg::*;

  logic x1, x2, x3, sum, carry;
  int checks = 0, failures = 0, wrong_rows = 0;

  approx_full_adder dut (.x1(x1), .x2(x2), .x3(x3), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int d;
      {x1, x2, x3} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== FA_TABLE[v]) begin
        failures++;
        $display("FAIL x=%b: got C,S=%b%b expected %b", 3'(v), carry, sum, FA_TABLE[v]);
      end
      d = int'({carry, sum}) - $countones(3'(v));
      if (d != 0) wrong_rows++;
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        $display("FAIL x=%b: error %0d larger than one", 3'(v), d);
      end
    end
    checks++;
    if (wrong_rows != 2) begin
      failures++;
      $display("FAIL: %0d approximated rows, expected 2", wrong_rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
