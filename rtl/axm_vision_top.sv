// axm_vision_top: the approximate multiplier and the two image datapaths
// built on it, side by side with their own ports.
//
//   mul_*    a bare axm8x8: 8x8 unsigned approximate product, combinational
//   shp_*    a conv_mac with a programmable kernel, used as the image
//            sharpening filter (e.g. a fixed-point Laplacian kernel); one
//            output pixel every 9 clocks
//   sob_*    a sobel_unit: Sobel gradients and edge strength for one 3x3
//            window; one result every 9 clocks
//   dct_*    a dct8x8: 2-D DCT of an 8x8 block for JPEG-style compression;
//            64 pixels in, 64 coefficients out, 640 clocks per block
// Each datapath holds its own multiplier instance. The convolution units
// take a whole window at a time; forming windows from a pixel stream (line
// buffers) is left to the surrounding system. One clock and one synchronous
// active-low reset serve all four datapaths. Which datapaths stand next to the
// multiplier follows the source's applications; the port grouping is this
// design's own.
module axm_vision_top
  import axm_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // bare multiplier
  input  logic [N_BITS-1:0]   mul_a,
  input  logic [N_BITS-1:0]   mul_b,
  output logic [P_BITS-1:0]   mul_raw_p,
  output logic [P_BITS-1:0]   mul_p,
  // sharpening MAC
  input  logic                shp_in_valid,
  output logic                shp_in_ready,
  input  window_t             shp_window,
  input  kernel_t             shp_kernel,
  input  logic [3:0]          shp_shift,
  output logic                shp_out_valid,
  output logic signed [19:0]  shp_result,
  output logic [N_BITS-1:0]   shp_pixel,
  // 5x5 smoothing MAC
  input  logic                        gss_in_valid,
  output logic                        gss_in_ready,
  input  logic [24:0][N_BITS-1:0]     gss_window,
  input  coef_t [24:0]                gss_kernel,
  input  logic [3:0]                  gss_shift,
  output logic                        gss_out_valid,
  output logic signed [19:0]          gss_result,
  output logic [N_BITS-1:0]           gss_pixel,
  // Sobel edge detector
  input  logic                sob_in_valid,
  output logic                sob_in_ready,
  input  window_t             sob_window,
  output logic                sob_out_valid,
  output logic signed [19:0]  sob_gx,
  output logic signed [19:0]  sob_gy,
  output logic [N_BITS-1:0]   sob_magnitude,
  // 8x8 DCT
  input  logic                dct_in_valid,
  output logic                dct_in_ready,
  input  logic [N_BITS-1:0]   dct_in_pixel,
  output logic                dct_out_valid,
  output logic                dct_out_last,
  output logic signed [11:0]  dct_out_coef
);
  axm8x8 u_mul (.a(mul_a), .b(mul_b), .raw_p(mul_raw_p), .p(mul_p));

  conv_mac #(.K(3), .ACC_BITS(20)) u_sharpen (
    .clk, .rst_n,
    .in_valid(shp_in_valid), .in_ready(shp_in_ready),
    .window(shp_window), .kernel(shp_kernel), .shift(shp_shift),
    .out_valid(shp_out_valid), .result(shp_result), .pixel(shp_pixel));

  conv_mac #(.K(5), .ACC_BITS(20)) u_smooth (
    .clk, .rst_n,
    .in_valid(gss_in_valid), .in_ready(gss_in_ready),
    .window(gss_window), .kernel(gss_kernel), .shift(gss_shift),
    .out_valid(gss_out_valid), .result(gss_result), .pixel(gss_pixel));

  sobel_unit #(.ACC_BITS(20)) u_sobel (
    .clk, .rst_n,
    .in_valid(sob_in_valid), .in_ready(sob_in_ready), .window(sob_window),
    .out_valid(sob_out_valid), .gx(sob_gx), .gy(sob_gy), .magnitude(sob_magnitude));

  dct8x8 u_dct (
    .clk, .rst_n,
    .in_valid(dct_in_valid), .in_ready(dct_in_ready), .in_pixel(dct_in_pixel),
    .out_valid(dct_out_valid), .out_last(dct_out_last), .out_coef(dct_out_coef));
endmodule
