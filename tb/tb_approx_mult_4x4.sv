// Testbench for approx_mult_4x4: applies all 256 operand pairs, one per
// clock cycle of a testbench clock, and compares the product with a
// reference built from the cells' truth tables (approx_ref_pkg). A few
// products worked out by hand are checked as well, and the testbench counts
// how often each approximate cell hits one of its inexact rows, failing if
// any cell never does.
module tb_approx_mult_4x4;
  import approx_ref_pkg::*;

  logic       clk = 1'b0;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;
  int cell_err [5] = '{0, 0, 0, 0, 0};
  int inexact = 0;

  approx_mult_4x4 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_p(input int unsigned ea, input int unsigned eb, input int unsigned ep);
    a = 4'(ea);
    b = 4'(eb);
    @(posedge clk);
    checks++;
    if (p !== 8'(ep)) begin
      failures++;
      $display("FAIL %0d x %0d: got %0d expected %0d", ea, eb, p, ep);
    end
  endtask

  initial begin
    // Hand-worked products: no cell approximates in the first three; in
    // 15 x 10 the compressor sees 0101 and gives 1 instead of 2 (150 - 8);
    // in 15 x 15 every cell errs (1 + 6 + 8 + 24 + 32 + 96 + 64 = 231).
    expect_p(10, 6, 60);
    expect_p(9, 5, 45);
    expect_p(0, 0, 0);
    expect_p(15, 10, 142);
    expect_p(15, 15, 231);

    for (int v = 0; v < 256; v++) begin
      logic [4:0] e;
      a = v[7:4];
      b = v[3:0];
      @(posedge clk);
      checks++;
      if (p !== 8'(ref_mult4(a, b))) begin
        failures++;
        $display("FAIL %0d x %0d: got %0d expected %0d", a, b, p, ref_mult4(a, b));
      end
      e = leaf_errors(a, b);
      for (int k = 0; k < 5; k++) if (e[k]) cell_err[k]++;
      if (int'(p) != int'(a) * int'(b)) inexact++;
    end

    for (int k = 0; k < 5; k++) begin
      checks++;
      if (cell_err[k] == 0) begin
        failures++;
        $display("FAIL: cell %0d never hit an approximated case", k);
      end
    end
    $display("inexact products: %0d of 256; cell error counts %0d %0d %0d %0d %0d",
             inexact, cell_err[0], cell_err[1], cell_err[2], cell_err[3], cell_err[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
