// dadda_tree: partial-product reduction of the 8x8 multiplier.
//
// The 64 partial products sit in 15 columns (heights 1,2,..,8,..,2,1). They
// are reduced in three levels with Dadda's height targets 6, 4 and 2, using
// 4:2 compressors wherever a column must lose three or four bits, and full or
// half adders for smaller reductions. Each level keeps a column's bits no
// higher than the target, counting the carries that arrive from the column to
// its right. A compressor's Cin is, where possible, the Cout of a compressor
// in the column to its right on the same level; Cout never depends on Cin,
// so no carry ripples along a level.
//
// Compressors in columns below APPROX_COLS are the approximate Ax-C42, those
// at and above it are exact. Full and half adders are always exact.
//
// Interface: pp[i][j] is the partial product of multiplier bit i and
// multiplicand bit j and belongs to column i+j. The tree leaves at most two
// bits per column, returned as the two addends row0 and row1 of the final
// carry-propagate adder; bits no column fills (row1[0] and bit 15 of both
// rows) are constant 0. Purely combinational.
//
// The three-level schedule and the cell placement are this design's own;
// the use of 4:2 compressors in a Dadda tree, exact in the upper half and
// approximate in the lower half of the columns, follows the source.
module dadda_tree
  import axm_pkg::*;
#(
  parameter int unsigned APPROX_COLS = AXM_APPROX_COLS
) (
  input  logic [N_BITS-1:0][N_BITS-1:0] pp,
  output logic [P_BITS-1:0]             row0,
  output logic [P_BITS-1:0]             row1
);

  logic s1c6_0_s, s1c6_0_c, s1c7_0_s, s1c7_0_c, s1c7_0_co, s1c8_0_s,
        s1c8_0_c, s1c8_0_co, s1c9_0_s, s1c9_0_c, s2c4_0_s, s2c4_0_c,
        s2c5_0_s, s2c5_0_c, s2c5_0_co, s2c6_0_s, s2c6_0_c, s2c6_0_co,
        s2c7_0_s, s2c7_0_c, s2c7_0_co, s2c8_0_s, s2c8_0_c, s2c8_0_co,
        s2c9_0_s, s2c9_0_c, s2c9_0_co, s2c10_0_s, s2c10_0_c, s2c10_0_co,
        s2c11_0_s, s2c11_0_c, s3c2_0_s, s3c2_0_c, s3c3_0_s, s3c3_0_c,
        s3c3_0_co, s3c4_0_s, s3c4_0_c, s3c4_0_co, s3c5_0_s, s3c5_0_c,
        s3c5_0_co, s3c6_0_s, s3c6_0_c, s3c6_0_co, s3c7_0_s, s3c7_0_c,
        s3c7_0_co, s3c8_0_s, s3c8_0_c, s3c8_0_co, s3c9_0_s, s3c9_0_c,
        s3c9_0_co, s3c10_0_s, s3c10_0_c, s3c10_0_co, s3c11_0_s, s3c11_0_c,
        s3c11_0_co, s3c12_0_s, s3c12_0_c, s3c12_0_co, s3c13_0_s, s3c13_0_c;

  // ---- level 1: columns reduced to at most 6 bits ----
  half_adder u_s1c6_0 (.a(pp[0][6]), .b(pp[1][5]), .s(s1c6_0_s), .co(s1c6_0_c));  // column 6
  c42_cell #(.APPROX(7 < APPROX_COLS)) u_s1c7_0 (  // column 7
    .i1(pp[0][7]), .i2(pp[1][6]), .i3(pp[2][5]), .i4(pp[3][4]), .cin(1'b0),
    .sum(s1c7_0_s), .carry(s1c7_0_c), .cout(s1c7_0_co));
  c42_cell #(.APPROX(8 < APPROX_COLS)) u_s1c8_0 (  // column 8
    .i1(pp[1][7]), .i2(pp[2][6]), .i3(pp[3][5]), .i4(pp[4][4]), .cin(1'b0),
    .sum(s1c8_0_s), .carry(s1c8_0_c), .cout(s1c8_0_co));
  full_adder u_s1c9_0 (.a(pp[2][7]), .b(pp[3][6]), .ci(pp[4][5]), .s(s1c9_0_s), .co(s1c9_0_c));  // column 9
  // ---- level 2: columns reduced to at most 4 bits ----
  half_adder u_s2c4_0 (.a(pp[0][4]), .b(pp[1][3]), .s(s2c4_0_s), .co(s2c4_0_c));  // column 4
  c42_cell #(.APPROX(5 < APPROX_COLS)) u_s2c5_0 (  // column 5
    .i1(pp[0][5]), .i2(pp[1][4]), .i3(pp[2][3]), .i4(pp[3][2]), .cin(1'b0),
    .sum(s2c5_0_s), .carry(s2c5_0_c), .cout(s2c5_0_co));
  c42_cell #(.APPROX(6 < APPROX_COLS)) u_s2c6_0 (  // column 6
    .i1(s1c6_0_s), .i2(pp[2][4]), .i3(pp[3][3]), .i4(pp[4][2]), .cin(s2c5_0_co),
    .sum(s2c6_0_s), .carry(s2c6_0_c), .cout(s2c6_0_co));
  c42_cell #(.APPROX(7 < APPROX_COLS)) u_s2c7_0 (  // column 7
    .i1(s1c6_0_c), .i2(s1c7_0_s), .i3(pp[4][3]), .i4(pp[5][2]), .cin(s2c6_0_co),
    .sum(s2c7_0_s), .carry(s2c7_0_c), .cout(s2c7_0_co));
  c42_cell #(.APPROX(8 < APPROX_COLS)) u_s2c8_0 (  // column 8
    .i1(s1c7_0_c), .i2(s1c8_0_s), .i3(pp[5][3]), .i4(pp[6][2]), .cin(s2c7_0_co),
    .sum(s2c8_0_s), .carry(s2c8_0_c), .cout(s2c8_0_co));
  c42_cell #(.APPROX(9 < APPROX_COLS)) u_s2c9_0 (  // column 9
    .i1(s1c8_0_c), .i2(s1c9_0_s), .i3(pp[5][4]), .i4(pp[6][3]), .cin(s2c8_0_co),
    .sum(s2c9_0_s), .carry(s2c9_0_c), .cout(s2c9_0_co));
  c42_cell #(.APPROX(10 < APPROX_COLS)) u_s2c10_0 (  // column 10
    .i1(s1c9_0_c), .i2(pp[3][7]), .i3(pp[4][6]), .i4(pp[5][5]), .cin(s2c9_0_co),
    .sum(s2c10_0_s), .carry(s2c10_0_c), .cout(s2c10_0_co));
  full_adder u_s2c11_0 (.a(pp[4][7]), .b(pp[5][6]), .ci(pp[6][5]), .s(s2c11_0_s), .co(s2c11_0_c));  // column 11
  // ---- level 3: columns reduced to at most 2 bits ----
  half_adder u_s3c2_0 (.a(pp[0][2]), .b(pp[1][1]), .s(s3c2_0_s), .co(s3c2_0_c));  // column 2
  c42_cell #(.APPROX(3 < APPROX_COLS)) u_s3c3_0 (  // column 3
    .i1(pp[0][3]), .i2(pp[1][2]), .i3(pp[2][1]), .i4(pp[3][0]), .cin(1'b0),
    .sum(s3c3_0_s), .carry(s3c3_0_c), .cout(s3c3_0_co));
  c42_cell #(.APPROX(4 < APPROX_COLS)) u_s3c4_0 (  // column 4
    .i1(s2c4_0_s), .i2(pp[2][2]), .i3(pp[3][1]), .i4(pp[4][0]), .cin(s3c3_0_co),
    .sum(s3c4_0_s), .carry(s3c4_0_c), .cout(s3c4_0_co));
  c42_cell #(.APPROX(5 < APPROX_COLS)) u_s3c5_0 (  // column 5
    .i1(s2c4_0_c), .i2(s2c5_0_s), .i3(pp[4][1]), .i4(pp[5][0]), .cin(s3c4_0_co),
    .sum(s3c5_0_s), .carry(s3c5_0_c), .cout(s3c5_0_co));
  c42_cell #(.APPROX(6 < APPROX_COLS)) u_s3c6_0 (  // column 6
    .i1(s2c5_0_c), .i2(s2c6_0_s), .i3(pp[5][1]), .i4(pp[6][0]), .cin(s3c5_0_co),
    .sum(s3c6_0_s), .carry(s3c6_0_c), .cout(s3c6_0_co));
  c42_cell #(.APPROX(7 < APPROX_COLS)) u_s3c7_0 (  // column 7
    .i1(s2c6_0_c), .i2(s2c7_0_s), .i3(pp[6][1]), .i4(pp[7][0]), .cin(s3c6_0_co),
    .sum(s3c7_0_s), .carry(s3c7_0_c), .cout(s3c7_0_co));
  c42_cell #(.APPROX(8 < APPROX_COLS)) u_s3c8_0 (  // column 8
    .i1(s2c7_0_c), .i2(s2c8_0_s), .i3(pp[7][1]), .i4(s1c7_0_co), .cin(s3c7_0_co),
    .sum(s3c8_0_s), .carry(s3c8_0_c), .cout(s3c8_0_co));
  c42_cell #(.APPROX(9 < APPROX_COLS)) u_s3c9_0 (  // column 9
    .i1(s2c8_0_c), .i2(s2c9_0_s), .i3(pp[7][2]), .i4(s1c8_0_co), .cin(s3c8_0_co),
    .sum(s3c9_0_s), .carry(s3c9_0_c), .cout(s3c9_0_co));
  c42_cell #(.APPROX(10 < APPROX_COLS)) u_s3c10_0 (  // column 10
    .i1(s2c9_0_c), .i2(s2c10_0_s), .i3(pp[6][4]), .i4(pp[7][3]), .cin(s3c9_0_co),
    .sum(s3c10_0_s), .carry(s3c10_0_c), .cout(s3c10_0_co));
  c42_cell #(.APPROX(11 < APPROX_COLS)) u_s3c11_0 (  // column 11
    .i1(s2c10_0_c), .i2(s2c11_0_s), .i3(pp[7][4]), .i4(s2c10_0_co), .cin(s3c10_0_co),
    .sum(s3c11_0_s), .carry(s3c11_0_c), .cout(s3c11_0_co));
  c42_cell #(.APPROX(12 < APPROX_COLS)) u_s3c12_0 (  // column 12
    .i1(s2c11_0_c), .i2(pp[5][7]), .i3(pp[6][6]), .i4(pp[7][5]), .cin(s3c11_0_co),
    .sum(s3c12_0_s), .carry(s3c12_0_c), .cout(s3c12_0_co));
  full_adder u_s3c13_0 (.a(pp[6][7]), .b(pp[7][6]), .ci(s3c12_0_co), .s(s3c13_0_s), .co(s3c13_0_c));  // column 13

  // ---- two rows for the carry-propagate adder ----
  assign row0 = {1'b0, s3c13_0_c, s3c12_0_c, s3c11_0_c, s3c10_0_c, s3c9_0_c, s3c8_0_c, s3c7_0_c, s3c6_0_c, s3c5_0_c, s3c4_0_c, s3c3_0_c, s3c2_0_c, s3c2_0_s, pp[0][1], pp[0][0]};
  assign row1 = {1'b0, pp[7][7], s3c13_0_s, s3c12_0_s, s3c11_0_s, s3c10_0_s, s3c9_0_s, s3c8_0_s, s3c7_0_s, s3c6_0_s, s3c5_0_s, s3c4_0_s, s3c3_0_s, pp[2][0], pp[1][0], 1'b0};

endmodule
