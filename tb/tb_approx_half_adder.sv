// Testbench for approx_half_adder: applies all four input pairs and compares
// Carry and Sum with the published truth table of the approximate half
// adder. Also checks that exactly one row differs from exact addition.
module tb_approx_half_adder;
  import approx_ref_pkg::*;

  logic x1, x2, sum, carry;
  int checks = 0, failures = 0, wrong_rows = 0;

  approx_half_adder dut (.x1(x1), .x2(x2), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== HA_TABLE[v]) begin
        failures++;
        $display("FAIL x=%b: got C,S=%b%b expected %b", 2'(v), carry, sum, HA_TABLE[v]);
      end
      if ({carry, sum} != 2'($countones(2'(v)))) wrong_rows++;
    end
    checks++;
    if (wrong_rows != 1) begin
      failures++;
      $display("FAIL: %0d approximated rows, expected 1", wrong_rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
