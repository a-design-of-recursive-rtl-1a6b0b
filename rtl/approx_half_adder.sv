// Approximate half adder.
//
// The exact half adder computes Sum = x1 XOR x2. Here the XOR is replaced by
// an OR, so Sum = x1 | x2 while Carry = x1 & x2 stays exact. The only wrong
// case is x1 = x2 = 1, where the cell outputs Carry,Sum = 1,1 (value 3)
// instead of 1,0 (value 2): the error is always exactly +1 in the cell's own
// weight. Both equations follow the published approximate half adder.
//
// Interface: two one-bit inputs; sum has the column's weight, carry has twice
// that weight. Purely combinational, no clock.
module approx_half_adder (
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);
  assign sum   = x1 | x2;
  assign carry = x1 & x2;
endmodule
