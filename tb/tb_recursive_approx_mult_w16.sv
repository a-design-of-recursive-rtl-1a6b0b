// Testbench for recursive_approx_mult at WIDTH = 16, two levels of
// recursion (sixteen 4x4 approximate leaves). Applies corner operands and
// 50,000 random pairs, one per testbench clock cycle, and compares each
// product with the table-based reference of approx_ref_pkg, including the
// wrap of the 32-bit output.
module tb_recursive_approx_mult_w16;
  import approx_ref_pkg::*;

  logic        clk = 1'b0;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0, n_inexact = 0;

  recursive_approx_mult #(.WIDTH(16)) dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] va, input logic [15:0] vb);
    longint unsigned r;
    a = va;
    b = vb;
    @(posedge clk);
    r = ref_mult(64'(a), 64'(b), 16);
    checks++;
    if (p !== 32'(r)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %0d x %0d: got %0d expected %0d", a, b, p, 32'(r));
    end
    if (longint'(p) != longint'(a) * longint'(b)) n_inexact++;
  endtask

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFFFF, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'h00FF, 16'hFF00);
    for (int i = 0; i < 50000; i++) apply(16'($urandom), 16'($urandom));
    checks++;
    if (n_inexact == 0) begin
      failures++;
      $display("FAIL: no product was approximated");
    end
    $display("inexact products: %0d of %0d", n_inexact, checks - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
