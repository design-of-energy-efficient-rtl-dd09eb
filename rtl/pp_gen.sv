// pp_gen: partial-product generator, an 8x8 AND array.
//
// pp[i][j] = b[i] & a[j] is the partial product of multiplier bit i and
// multiplicand bit j; it carries weight 2^(i+j), i.e. it lies in product
// column i+j. The 64 products form the matrix the reduction tree compresses.
// Partial-product truncation: products in the TRUNC_COLS lowest columns
// (i + j < TRUNC_COLS) are forced to 0 and need no gate. The default of 0
// keeps all 64. Combinational.
module pp_gen
  import axm_pkg::*;
#(
  parameter int unsigned TRUNC_COLS = AXM_TRUNC_COLS
) (
  input  logic [N_BITS-1:0]             a,
  input  logic [N_BITS-1:0]             b,
  output logic [N_BITS-1:0][N_BITS-1:0] pp
);
  for (genvar i = 0; i < N_BITS; i++) begin : g_row
    for (genvar j = 0; j < N_BITS; j++) begin : g_col
      if (i + j < TRUNC_COLS) begin : g_trunc
        assign pp[i][j] = 1'b0;
      end else begin : g_and
        assign pp[i][j] = b[i] & a[j];
      end
    end
  end
endmodule
