// c42_cell: one 4:2 compressor position of the reduction tree. The APPROX
// parameter, fixed per column when the tree is elaborated, picks the
// approximate Ax-C42 (APPROX = 1) or the exact compressor (APPROX = 0).
// Ports and timing are those of the chosen compressor: combinational,
// i1 + i2 + i3 + i4 + cin ~ sum + 2 * (carry + cout).
module c42_cell #(
  parameter bit APPROX = 1'b0
) (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  if (APPROX) begin : g_ax
    ax_c42 u_c42 (.i1, .i2, .i3, .i4, .cin, .sum, .carry, .cout);
  end else begin : g_exact
    exact_c42 u_c42 (.i1, .i2, .i3, .i4, .cin, .sum, .carry, .cout);
  end
endmodule
