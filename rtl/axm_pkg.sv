// axm_pkg: sizes and constants shared by the approximate multiplier.
//
// N_BITS is the operand width and P_BITS the product width of the 8x8
// multiplier. AXM_APPROX_COLS is the first product column that uses exact
// 4:2 compressors: columns [7:0] are approximated, [15:8] are exact.
// ECL_BIAS (0x0042) is the constant the error correction logic adds to the
// product, and ECL_BITS (10) the width of the ripple-carry adder that adds
// it. All of these are the source's numbers. AXM_TRUNC_COLS, the number of
// low product columns whose partial products are dropped, is this design's
// own choice: the source names partial-product truncation but gives no
// depth, and 0 (no column dropped) leaves the smallest mean error once the
// bias is added.
// The 3x3 window and kernel types serve the convolution datapaths built
// around the multiplier.
package axm_pkg;
  localparam int unsigned N_BITS          = 8;
  localparam int unsigned P_BITS          = 2 * N_BITS;
  localparam int unsigned AXM_APPROX_COLS = 8;
  localparam int unsigned AXM_TRUNC_COLS  = 0;
  localparam int unsigned ECL_BITS        = 10;
  localparam logic [P_BITS-1:0] ECL_BIAS  = 16'h0042;

  // 3x3 convolution: one kernel tap is a sign and an 8-bit magnitude, so the
  // unsigned multiplier sees magnitudes only and the accumulator adds or
  // subtracts. Window and kernel are stored row by row, tap 0 top left.
  localparam int unsigned TAPS = 9;
  typedef struct packed {
    logic                neg;   // 1: subtract this tap's product
    logic [N_BITS-1:0]   mag;   // coefficient magnitude
  } coef_t;
  typedef logic [TAPS-1:0][N_BITS-1:0] window_t;
  typedef coef_t [TAPS-1:0]            kernel_t;
endpackage
