// axm8x8: energy-efficient 8x8 unsigned approximate multiplier.
//
// p ~ a * b. The datapath is four combinational blocks in a row:
//   pp_gen      64 AND gates form the partial-product matrix
//   dadda_tree  4:2 compressors reduce it to two rows; columns [7:0] use the
//               approximate Ax-C42, columns [15:8] the exact compressor
//   ks_adder    16-bit Kogge-Stone adder adds the two rows
//   ecl_adder   error correction: adds the bias 0x0042, which offsets the
//               approximate compressors' one-sided (low) error on average
// No clock: the product settles one combinational delay after a and b.
// raw_p, the product before correction, is brought out for error analysis.
//
// Parameters: APPROX_COLS (8) is the first column with exact compressors;
// setting it to 0 makes the tree exact. TRUNC_COLS (0) drops the partial
// products of that many low columns. BIAS is the correction constant; 0
// turns the correction off. APPROX_COLS and BIAS follow the source; the
// truncation depth is this design's choice.
module axm8x8
  import axm_pkg::*;
#(
  parameter int unsigned       APPROX_COLS = AXM_APPROX_COLS,
  parameter int unsigned       TRUNC_COLS  = AXM_TRUNC_COLS,
  parameter logic [P_BITS-1:0] BIAS        = ECL_BIAS
) (
  input  logic [N_BITS-1:0] a,
  input  logic [N_BITS-1:0] b,
  output logic [P_BITS-1:0] raw_p,
  output logic [P_BITS-1:0] p
);
  logic [N_BITS-1:0][N_BITS-1:0] pp;
  logic [P_BITS-1:0]             row0, row1;
  logic                          unused_cout;

  pp_gen #(.TRUNC_COLS(TRUNC_COLS)) u_ppg (.a, .b, .pp);

  dadda_tree #(.APPROX_COLS(APPROX_COLS)) u_tree (.pp, .row0, .row1);

  // The product needs 16 bits, so the adder's carry out is always 0.
  ks_adder #(.WIDTH(P_BITS)) u_cpa (.x(row0), .y(row1), .sum(raw_p), .cout(unused_cout));

  ecl_adder #(.WIDTH(P_BITS), .BITS(ECL_BITS), .BIAS(BIAS)) u_ecl (.raw(raw_p), .corrected(p));
endmodule
