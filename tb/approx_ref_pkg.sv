// Reference model shared by the multiplier testbenches.
//
// The approximate cells are modelled here by their truth tables (value of
// Carry,Sum for every input combination), not by their gate equations, so the
// testbenches check the RTL against an independent description. On top of the
// tables the package rebuilds the 4x4 leaf multiplier column by column and the
// recursive composition of wider multipliers.
package approx_ref_pkg;

  // Output value 2*Carry + Sum, indexed by the input bits {x1,x2}.
  localparam logic [1:0] HA_TABLE [4] = '{2'd0, 2'd1, 2'd1, 2'd3};
  // Indexed by {x1,x2,x3}.
  localparam logic [1:0] FA_TABLE [8] = '{2'd0, 2'd1, 2'd1, 2'd2,
                                          2'd1, 2'd2, 2'd1, 2'd2};
  // Indexed by {x1,x2,x3,x4}.
  localparam logic [1:0] C42_TABLE [16] = '{2'd0, 2'd1, 2'd1, 2'd2,
                                            2'd1, 2'd1, 2'd1, 2'd3,
                                            2'd1, 2'd1, 2'd1, 2'd3,
                                            2'd2, 2'd3, 2'd3, 2'd3};

  function automatic int unsigned pp(input logic [3:0] a, input logic [3:0] b,
                                     input int i, input int j);
    return int'(a[i]) & int'(b[j]);
  endfunction

  // 4x4 leaf: one table-modelled cell per column, values added exactly.
  function automatic int unsigned ref_mult4(input logic [3:0] a, input logic [3:0] b);
    int unsigned v;
    v  = pp(a, b, 0, 0);
    v += 2  * HA_TABLE[{a[1] & b[0], a[0] & b[1]}];
    v += 4  * FA_TABLE[{a[2] & b[0], a[1] & b[1], a[0] & b[2]}];
    v += 8  * C42_TABLE[{a[3] & b[0], a[2] & b[1], a[1] & b[2], a[0] & b[3]}];
    v += 16 * FA_TABLE[{a[3] & b[1], a[2] & b[2], a[1] & b[3]}];
    v += 32 * HA_TABLE[{a[3] & b[2], a[2] & b[3]}];
    v += 64 * pp(a, b, 3, 3);
    return v;
  endfunction

  // Which cells of the leaf fall into an approximated (wrong) row of their
  // table: bit 0 column-1 HA, 1 column-2 FA, 2 compressor, 3 column-4 FA,
  // 4 column-5 HA.
  function automatic logic [4:0] leaf_errors(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] i1;
    logic [2:0] i2, i4;
    logic [3:0] i3;
    logic [1:0] i5;
    logic [4:0] e;
    i1 = {a[1] & b[0], a[0] & b[1]};
    i2 = {a[2] & b[0], a[1] & b[1], a[0] & b[2]};
    i3 = {a[3] & b[0], a[2] & b[1], a[1] & b[2], a[0] & b[3]};
    i4 = {a[3] & b[1], a[2] & b[2], a[1] & b[3]};
    i5 = {a[3] & b[2], a[2] & b[3]};
    e[0] = HA_TABLE[i1]  != 2'($countones(i1));
    e[1] = FA_TABLE[i2]  != 2'($countones(i2));
    e[2] = C42_TABLE[i3] != 2'($countones(i3));
    e[3] = FA_TABLE[i4]  != 2'($countones(i4));
    e[4] = HA_TABLE[i5]  != 2'($countones(i5));
    return e;
  endfunction

  // Recursive composition, 64-bit unbounded (no wrap); the caller truncates.
  function automatic longint unsigned ref_mult(input longint unsigned a,
                                               input longint unsigned b,
                                               input int w);
    longint unsigned mask, ah, al, bh, bl;
    int h;
    if (w == 4) return longint'(ref_mult4(a[3:0], b[3:0]));
    h    = w / 2;
    mask = (64'd1 << h) - 1;
    ah = (a >> h) & mask;  al = a & mask;
    bh = (b >> h) & mask;  bl = b & mask;
    // each sub-result wraps at 2*h bits, as the sub-multiplier's output does
    return (((ref_mult(ah, bh, h) & ((64'd1 << w) - 1)) << w)
          + ((ref_mult(ah, bl, h) & ((64'd1 << w) - 1)) << h)
          + ((ref_mult(al, bh, h) & ((64'd1 << w) - 1)) << h)
          +  (ref_mult(al, bl, h) & ((64'd1 << w) - 1)));
  endfunction

endpackage
