// Approximate full adder.
//
// One of the two XOR gates of an exact full adder becomes an OR:
//   W = x1 | x2,  Sum = W ^ x3,  Carry = W & x3.
// Compared with the exact sum x1 + x2 + x3 this is wrong in two of eight
// cases: inputs 1,1,0 give 1 instead of 2, and inputs 1,1,1 give 2 instead
// of 3. The error is always -1, never larger. The input order matters: x3 is
// the operand that is XORed, x1 and x2 are merged by the OR.
//
// Interface: three one-bit inputs; sum has the column's weight, carry has
// twice that weight. Purely combinational, no clock.
module approx_full_adder (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic sum,
  output logic carry
);
  logic w;

  assign w     = x1 | x2;
  assign sum   = w ^ x3;
  assign carry = w & x3;
endmodule
