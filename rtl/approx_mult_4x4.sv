// 4x4 approximate multiplier, the leaf of the recursive multiplier.
//
// It works in the usual three steps of a multiplier:
//  1. Partial products: pp(i,j) = a[i] & b[j], sixteen AND gates, in seven
//     columns of weight 2^0 .. 2^6.
//  2. Reduction: each column with more than one partial product is reduced
//     to one sum bit s[k] and one carry bit c[k] (weight 2^(k+1)) by a single
//     approximate cell, in one level:
//        column 1: a1b0, a0b1             -> approximate half adder
//        column 2: a2b0, a1b1, a0b2       -> approximate full adder
//        column 3: a3b0, a2b1, a1b2, a0b3 -> approximate 4-2 compressor
//        column 4: a3b1, a2b2, a1b3       -> approximate full adder
//        column 5: a3b2, a2b3             -> approximate half adder
//     Columns 0 and 6 hold one product each, which passes straight to s[0]
//     and s[6]. The column-to-cell assignment is the published one. The
//     order in which the products enter a cell's inputs (top to bottom as
//     listed above, to x1, x2, x3, x4) is this design's choice; it decides
//     which input patterns are approximated.
//  3. Vector merge: an exact adder adds the sum row s[6:0] and the carry row
//     c[5:1] (shifted to its weight) into the 8-bit product. The exact adder
//     here is this design's choice; the source only calls for a final
//     addition of the two rows.
//
// Because each cell errs by at most one unit of its own weight, the result
// can be above or below the exact product; 15 x 15 gives 231 rather than 225,
// which still fits the 8-bit output, so no overflow can occur.
//
// Interface: a and b are unsigned 4-bit operands; p is the 8-bit approximate
// product. Purely combinational, no clock and no latency.
module approx_mult_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  // pp[i][j] = a[i] & b[j], weight 2^(i+j)
  logic [3:0][3:0] pp;
  logic [6:0]      s;   // sum row, s[k] has weight 2^k
  logic [5:1]      c;   // carry row, c[k] comes from column k, weight 2^(k+1)

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        pp[i][j] = a[i] & b[j];
      end
    end
  end

  assign s[0] = pp[0][0];

  approx_half_adder u_col1 (
    .x1(pp[1][0]), .x2(pp[0][1]),
    .sum(s[1]), .carry(c[1])
  );

  approx_full_adder u_col2 (
    .x1(pp[2][0]), .x2(pp[1][1]), .x3(pp[0][2]),
    .sum(s[2]), .carry(c[2])
  );

  approx_compressor_4_2 u_col3 (
    .x1(pp[3][0]), .x2(pp[2][1]), .x3(pp[1][2]), .x4(pp[0][3]),
    .sum(s[3]), .carry(c[3])
  );

  approx_full_adder u_col4 (
    .x1(pp[3][1]), .x2(pp[2][2]), .x3(pp[1][3]),
    .sum(s[4]), .carry(c[4])
  );

  approx_half_adder u_col5 (
    .x1(pp[3][2]), .x2(pp[2][3]),
    .sum(s[5]), .carry(c[5])
  );

  assign s[6] = pp[3][3];

  // Vector merge: exact addition of the sum row and the carry row.
  assign p = {1'b0, s} + {1'b0, c, 2'b00};
endmodule
