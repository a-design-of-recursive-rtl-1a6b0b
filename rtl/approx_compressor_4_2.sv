// Approximate 4-2 compressor.
//
// Adds four bits of one column into just two output bits, Carry (weight 2)
// and Sum (weight 1), with no carry-in or carry-out to the neighbouring
// column. Four ones would need three output bits, so that case is clipped to
// 3 (Carry = Sum = 1). The equations are
//   W1 = x1 & x2,  W2 = x3 & x4,
//   Sum   = (x1 ^ x2) | (x3 ^ x4) | (W1 & W2),
//   Carry = W1 | W2.
// The result is wrong by one in five of the 16 input combinations (one one
// in each pair, and all ones), and an all-zero input always gives zero.
// Inputs pair up as (x1,x2) and (x3,x4), so which bit goes where matters.
//
// Interface: four one-bit inputs, two one-bit outputs. Purely combinational.
module approx_compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  logic w1, w2;

  assign w1    = x1 & x2;
  assign w2    = x3 & x4;
  assign sum   = (x1 ^ x2) | (x3 ^ x4) | (w1 & w2);
  assign carry = w1 | w2;
endmodule
