// ax_c42: approximate 4:2 compressor (Ax-C42) for the low product columns.
//
// Same ports and weights as the exact compressor (sum weight 1, carry and
// cout weight 2), but two-level AND-OR logic replaces the XOR chain:
//   s4    = (i1 ^ i2) | (i3 ^ i4)   each XOR as an AND-OR of its inputs
//   sum   = s4 | cin                 cin is ORed in, not XORed
//   carry = (i1 & i2) | (i3 & i4)
//   cout  = i1 & i2 & i3 & i4
// Against the exact count the result is never high. It is one low when
// exactly two inputs are set, one from {i1,i2} and one from {i3,i4} (four
// of the sixteen i1..i4 patterns), one low when s4 and cin are both set, and
// at most two low in all. This one-sided error is what the bias of the error
// correction logic offsets. cout does not depend on cin. Combinational.
//
// The source states the goals (two-level AND-OR-INVERT logic, no XOR with
// cin in the sum, an error of at most two, a negative bias) but prints no
// truth table; these equations are this design's own.
module ax_c42 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, x34, s4;

  assign x12   = (i1 | i2) & ~(i1 & i2);
  assign x34   = (i3 | i4) & ~(i3 & i4);
  assign s4    = x12 | x34;
  assign sum   = s4 | cin;
  assign carry = (i1 & i2) | (i3 & i4);
  assign cout  = i1 & i2 & i3 & i4;
endmodule
