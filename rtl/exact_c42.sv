// exact_c42: exact 4:2 compressor.
//
// Adds five bits of one column, i1..i4 and cin, and returns the count as
// sum (weight 1) plus carry and cout (both weight 2):
//   i1 + i2 + i3 + i4 + cin = sum + 2 * (carry + cout).
// It is built from two full adders in the usual way. cout depends only on
// i1..i3, never on cin, so a row of compressors, each taking its cin from
// the cout of its right neighbour, has no rippling carry. Combinational.
// Used in the upper half of the product columns, as the source prescribes.
module exact_c42 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  assign s1    = i1 ^ i2 ^ i3;
  assign cout  = (i1 & i2) | (i3 & (i1 ^ i2));
  assign sum   = s1 ^ i4 ^ cin;
  assign carry = (s1 & i4) | (cin & (s1 ^ i4));
endmodule
