// End-to-end testbench for recursive_approx_mult at its default width of
// 8 bits: four 4x4 approximate leaves and the shift-and-add around them.
// All 65,536 operand pairs are applied, one per testbench clock cycle, and
// each product is compared with a reference built from the cells' truth
// tables (approx_ref_pkg). The testbench counts how often each mechanism of
// the design occurs and fails if one never does: an inexact product, an
// exact one, each approximate cell type hitting an inexact row in some leaf,
// and the 16-bit output wrapping when the approximate sum passes 65,535. It
// also reports the mean and largest error against the exact product.
module tb_recursive_approx_mult;
  import approx_ref_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_exact = 0, n_inexact = 0, n_wrap = 0;
  int n_ha = 0, n_fa = 0, n_c42 = 0;
  longint sum_abs_err = 0, sum_abs_err_nowrap = 0;
  int max_abs_err = 0;

  recursive_approx_mult dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endfunction

  initial begin
    // Hand-worked: 15 x 15 uses only the low leaf (231); 255 x 255 makes all
    // four leaves give 231, 231*256 + 2*231*16 + 231 = 66759, which wraps to
    // 1223 in 16 bits.
    a = 8'd15; b = 8'd15;
    @(posedge clk);
    checks++;
    if (p !== 16'd231) begin failures++; $display("FAIL 15x15: got %0d", p); end
    a = 8'd255; b = 8'd255;
    @(posedge clk);
    checks++;
    if (p !== 16'd1223) begin failures++; $display("FAIL 255x255: got %0d", p); end

    for (int v = 0; v < 65536; v++) begin
      longint unsigned r;
      int err;
      logic [4:0] e;
      a = v[15:8];
      b = v[7:0];
      @(posedge clk);
      r = ref_mult(64'(a), 64'(b), 8);
      checks++;
      if (p !== 16'(r)) begin
        failures++;
        if (failures < 20)
          $display("FAIL %0d x %0d: got %0d expected %0d", a, b, p, 16'(r));
      end
      if (r > 64'hFFFF) n_wrap++;
      err = int'(p) - int'(a) * int'(b);
      if (err == 0) n_exact++; else n_inexact++;
      if (err < 0) err = -err;
      sum_abs_err += longint'(err);
      if (r <= 64'hFFFF) sum_abs_err_nowrap += longint'(err);
      if (err > max_abs_err) max_abs_err = err;
      for (int q = 0; q < 4; q++) begin
        logic [3:0] qa, qb;
        qa = q[1] ? a[7:4] : a[3:0];
        qb = q[0] ? b[7:4] : b[3:0];
        e = leaf_errors(qa, qb);
        if (e[0] | e[4]) n_ha++;
        if (e[1] | e[3]) n_fa++;
        if (e[2])        n_c42++;
      end
    end

    count(n_exact,   "an exact product");
    count(n_inexact, "an approximated product");
    count(n_ha,      "an approximated half-adder case");
    count(n_fa,      "an approximated full-adder case");
    count(n_c42,     "an approximated 4-2 compressor case");
    count(n_wrap,    "a wrap of the 16-bit output");
    $display("exact %0d, inexact %0d, wrapped %0d; leaf cell errors HA %0d FA %0d 4-2 %0d",
             n_exact, n_inexact, n_wrap, n_ha, n_fa, n_c42);
    $display("mean |error| %0.2f (%0.2f without wrapped cases), max |error| %0d",
             real'(sum_abs_err) / 65536.0,
             real'(sum_abs_err_nowrap) / real'(65536 - n_wrap), max_abs_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
