// tb_axm_vision_top: end-to-end test of the whole design at its default
// parameters.
//   1. Bare multiplier: all 65536 operand pairs; p must be raw_p + 0x42,
//      raw_p never above a * b, and the sum of absolute errors of p must
//      equal the value of an independent bit-accurate model (6399892).
//   2. Sharpening: a 24x24 synthetic grey-level image is filtered with the
//      Laplacian-enhanced kernel [0 -1 0; -1 5 -1; 0 -1 0] in fixed point
//      (x32, shift 5) through the sharpening MAC, window by window, back to
//      back. Each pixel is checked against the multiplier's error bound
//      around the exact filter, and the PSNR against the exact filter is
//      printed.
//   2b. Smoothing: the same image through the 5x5 MAC with the Gaussian
//      kernel [1 4 6 4 1]' x [1 4 6 4 1] / 256, back to back; each pixel
//      within the error bound around the exact filter, PSNR printed.
//   3. Sobel: the same image through the Sobel unit at the same time; the
//      gradients must be exact (coefficients 1 and 2 multiply exactly and
//      the bias cancels).
//   4. DCT: the image's first four 8x8 blocks through the DCT unit at the
//      same time; every coefficient must lie within 20 of a double-precision
//      DCT of the block, and each block must take 640 clocks.
// Counts the mechanisms (approximate products, bias carry into the upper
// bits, zero-tap skips, back-to-back windows, clamps) and fails if one
// never happened.
module tb_axm_vision_top;
  import axm_pkg::*;

  localparam int IMG = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] mul_a, mul_b;
  logic [15:0] mul_raw_p, mul_p;
  logic shp_in_valid = 1'b0, shp_in_ready, shp_out_valid;
  window_t shp_window, sob_window;
  kernel_t shp_kernel;
  logic [3:0] shp_shift;
  logic signed [19:0] shp_result, sob_gx, sob_gy;
  logic [7:0] shp_pixel, sob_magnitude;
  logic sob_in_valid = 1'b0, sob_in_ready, sob_out_valid;
  logic gss_in_valid = 1'b0, gss_in_ready, gss_out_valid;
  logic [24:0][7:0] gss_window;
  coef_t [24:0] gss_kernel;
  logic [3:0] gss_shift;
  logic signed [19:0] gss_result;
  logic [7:0] gss_pixel;
  logic dct_in_valid = 1'b0, dct_in_ready, dct_out_valid, dct_out_last;
  logic [7:0] dct_in_pixel;
  logic signed [11:0] dct_out_coef;
  int checks = 0, failures = 0;

  axm_vision_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Synthetic image: smooth blobs plus a hard horizontal edge.
  logic [7:0] img [IMG][IMG];
  function automatic logic [7:0] gen_px(int r, int c);
    int v = 128 + ((r * 37 + c * 11) % 64) - ((r * c) % 48) + (c % 5) * 6;
    if (r >= IMG / 2) v = v - 90;
    if (r == 3 && c > 4 && c < 10) v = 255;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

  function automatic window_t win_at(int r, int c);
    window_t w;
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++)
        w[3 * dr + dc] = img[r + dr - 1][c + dc - 1];
    return w;
  endfunction

  // mechanisms
  int n_approx = 0, n_ecl_carry = 0, n_shp_hi = 0, n_shp_lo = 0, n_sob_clamp = 0;
  int n_shp_b2b = 0, n_zero_taps = 0, n_shp = 0, n_sob = 0;
  real sq_err = 0.0;
  longint sum_abs = 0;

  // expected sharpening and Sobel values, queued in window order
  int shp_lo_q[$], shp_hi_q[$], shp_exact_q[$];
  int sob_gx_q[$], sob_gy_q[$];
  int shp_last = -100, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && shp_out_valid) begin
    int lo, hi, ex, pix;
    n_shp++;
    if (cyc - shp_last == 9) n_shp_b2b++;
    shp_last = cyc;
    lo = shp_lo_q.pop_front(); hi = shp_hi_q.pop_front(); ex = shp_exact_q.pop_front();
    checks++;
    if (int'(shp_result) < lo || int'(shp_result) > hi) begin
      failures++;
      $display("FAIL sharpen result %0d outside [%0d, %0d]", shp_result, lo, hi);
    end
    pix = int'(shp_result) < 0 ? 0 : int'(shp_result) > 255 ? 255 : int'(shp_result);
    check(int'(shp_pixel) == pix, "sharpen pixel clamp");
    if (int'(shp_result) > 255) n_shp_hi++;
    if (int'(shp_result) < 0) n_shp_lo++;
    ex = ex < 0 ? 0 : ex > 255 ? 255 : ex;
    sq_err += real'((pix - ex) * (pix - ex));
  end

  always @(posedge clk) if (rst_n && sob_out_valid) begin
    int ex, ey, m;
    n_sob++;
    ex = sob_gx_q.pop_front(); ey = sob_gy_q.pop_front();
    m = (ex < 0 ? -ex : ex) + (ey < 0 ? -ey : ey);
    if (m > 255) begin m = 255; n_sob_clamp++; end
    checks++;
    if (int'(sob_gx) != ex || int'(sob_gy) != ey || int'(sob_magnitude) != m) begin
      failures++;
      $display("FAIL sobel %0d %0d %0d expected %0d %0d %0d", sob_gx, sob_gy, sob_magnitude, ex, ey, m);
    end
  end

  task automatic run_sharpen();
    for (int r = 1; r < IMG - 1; r++)
      for (int c = 1; c < IMG - 1; c++) begin
        int ex, s;
        shp_window = win_at(r, c);
        // exact filter in the x32 fixed point of the kernel
        s = 160 * img[r][c] - 32 * (img[r-1][c] + img[r+1][c] + img[r][c-1] + img[r][c+1]);
        // five non-zero taps, each +0x42; the centre product (x160) may be
        // up to 624 low, the x32 products are exact
        shp_lo_q.push_back((s + 66 - 4 * 66 - 624) >>> 5);
        shp_hi_q.push_back((s + 66 - 4 * 66) >>> 5);
        shp_exact_q.push_back(s >>> 5);
        shp_in_valid = 1'b1;
        @(posedge clk);
        while (!shp_in_ready) @(posedge clk);
        for (int t = 0; t < TAPS; t++) if (shp_kernel[t].mag == 0) n_zero_taps++;
        @(negedge clk);
      end
    shp_in_valid = 1'b0;
  endtask

  // DCT: reference coefficients per block, checked as they stream out
  localparam int NDCT = 4;
  real dct_ref [NDCT][64];
  int dct_ob = 0, dct_oi = 0, n_dct_blocks = 0, dct_start = 0, dct_first = -1;
  real dct_max_err = 0.0;

  function automatic logic [7:0] dct_px(int b, int i);
    return img[8 * (b / 2) + i / 8][8 * (b % 2) + i % 8];
  endfunction

  always @(posedge clk) if (rst_n && dct_out_valid) begin
    real e;
    e = real'(dct_out_coef) - dct_ref[dct_ob][dct_oi];
    if (e < 0) e = -e;
    if (e > dct_max_err) dct_max_err = e;
    checks++;
    if (e > 20.0) begin
      failures++;
      $display("FAIL DCT block %0d coef %0d: %0d, reference %0.1f", dct_ob, dct_oi, dct_out_coef, dct_ref[dct_ob][dct_oi]);
    end
    dct_oi++;
    if (dct_out_last) begin
      checks++;
      if (dct_oi != 64) begin failures++; $display("FAIL DCT block length %0d", dct_oi); end
      dct_oi = 0; dct_ob++; n_dct_blocks++;
    end
  end

  task automatic run_dct();
    for (int b = 0; b < NDCT; b++)
      for (int u = 0; u < 8; u++)
        for (int w = 0; w < 8; w++) begin
          real s = 0.0;
          for (int x = 0; x < 8; x++)
            for (int z = 0; z < 8; z++)
              s += (real'(dct_px(b, 8 * x + z)) - 128.0)
                   * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0)
                   * $cos((2.0 * z + 1.0) * w * 3.14159265358979 / 16.0);
          dct_ref[b][8 * u + w] = s * ((u == 0) ? $sqrt(0.125) : 0.5) * ((w == 0) ? $sqrt(0.125) : 0.5);
        end
    dct_start = cyc;
    for (int b = 0; b < NDCT; b++)
      for (int i = 0; i < 64; i++) begin
        dct_in_pixel = dct_px(b, i);
        dct_in_valid = 1'b1;
        @(posedge clk);
        while (!dct_in_ready) @(posedge clk);
        @(negedge clk);
      end
    dct_in_valid = 1'b0;
    while (n_dct_blocks < NDCT) @(negedge clk);
    dct_first = cyc - dct_start;
  endtask

  // 5x5 Gaussian smoothing
  localparam int G1D [5] = '{1, 4, 6, 4, 1};
  int gss_lo_q[$], gss_hi_q[$], gss_exact_q[$];
  int n_gss = 0, n_gss_b2b = 0, gss_last = -100;
  real gss_sq_err = 0.0;

  always @(posedge clk) if (rst_n && gss_out_valid) begin
    int lo, hi, ex;
    n_gss++;
    if (cyc - gss_last == 25) n_gss_b2b++;
    gss_last = cyc;
    lo = gss_lo_q.pop_front(); hi = gss_hi_q.pop_front(); ex = gss_exact_q.pop_front();
    checks++;
    if (int'(gss_result) < lo || int'(gss_result) > hi) begin
      failures++;
      $display("FAIL smoothing result %0d outside [%0d, %0d]", gss_result, lo, hi);
    end
    check(int'(gss_pixel) == (int'(gss_result) > 255 ? 255 : int'(gss_result)), "smoothing pixel");
    gss_sq_err += real'((int'(gss_pixel) - ex) * (int'(gss_pixel) - ex));
  end

  task automatic run_smooth();
    for (int r = 2; r < IMG - 2; r++)
      for (int c = 2; c < IMG - 2; c++) begin
        int s = 0, napprox = 0;
        for (int dr = 0; dr < 5; dr++)
          for (int dc = 0; dc < 5; dc++) begin
            int w = G1D[dr] * G1D[dc];
            gss_window[5 * dr + dc] = img[r + dr - 2][c + dc - 2];
            s += w * img[r + dr - 2][c + dc - 2];
            if ((w & (w - 1)) != 0) napprox++;   // not a power of two
          end
        // 25 positive taps, each +0x42; products by a non-power-of-two
        // coefficient may be up to 624 low
        gss_lo_q.push_back((s + 25 * 66 - napprox * 624) >>> 8);
        gss_hi_q.push_back((s + 25 * 66) >>> 8);
        gss_exact_q.push_back((s + 128) >>> 8);
        gss_in_valid = 1'b1;
        @(posedge clk);
        while (!gss_in_ready) @(posedge clk);
        @(negedge clk);
      end
    gss_in_valid = 1'b0;
  endtask

  task automatic run_sobel();
    for (int r = 1; r < IMG - 1; r++)
      for (int c = 1; c < IMG - 1; c++) begin
        sob_window = win_at(r, c);
        sob_gx_q.push_back(img[r-1][c+1] + 2 * img[r][c+1] + img[r+1][c+1]
                         - img[r-1][c-1] - 2 * img[r][c-1] - img[r+1][c-1]);
        sob_gy_q.push_back(img[r+1][c-1] + 2 * img[r+1][c] + img[r+1][c+1]
                         - img[r-1][c-1] - 2 * img[r-1][c] - img[r-1][c+1]);
        sob_in_valid = 1'b1;
        @(posedge clk);
        while (!sob_in_ready) @(posedge clk);
        @(negedge clk);
      end
    sob_in_valid = 1'b0;
  endtask

  initial begin

    real psnr;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++)
        img[r][c] = gen_px(r, c);
    shp_window = '0; sob_window = '0; shp_shift = 4'd5;
    gss_window = '0; gss_shift = 4'd8;
    for (int t = 0; t < 25; t++) begin
      gss_kernel[t].neg = 1'b0;
      gss_kernel[t].mag = 8'(G1D[t / 5] * G1D[t % 5]);
    end
    // Laplacian-enhanced sharpening kernel, x32: centre +160, edges -32, corners 0
    for (int t = 0; t < TAPS; t++) begin
      shp_kernel[t].neg = (t == 1 || t == 3 || t == 5 || t == 7);
      shp_kernel[t].mag = (t == 4) ? 8'd160 : (t % 2 == 1) ? 8'd32 : 8'd0;
    end

    // 1. bare multiplier
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++) begin
        mul_a = 8'(ia); mul_b = 8'(ib);
        #1;
        check(mul_p == 16'(mul_raw_p + 16'h0042) && int'(mul_raw_p) <= ia * ib,
              "multiplier: bias and one-sided error");
        if (int'(mul_raw_p) != ia * ib) n_approx++;
        if (mul_p[15:10] != mul_raw_p[15:10]) n_ecl_carry++;
        sum_abs += (int'(mul_p) > ia * ib) ? longint'(int'(mul_p) - ia * ib) : longint'(ia * ib - int'(mul_p));
      end
    check(sum_abs == 64'd6399892, "multiplier: sum of absolute errors");

    // 2. and 3. image datapaths, run concurrently
    @(negedge clk);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    dct_in_pixel = '0;
    fork
      run_sharpen();
      run_smooth();
      run_sobel();
      run_dct();
    join
    repeat (40) @(negedge clk);

    psnr = 10.0 * $log10(255.0 * 255.0 / (sq_err / real'(n_shp)));
    $display("sharpen outputs=%0d PSNR=%0.2f dB against the exact filter; sobel outputs=%0d",
             n_shp, psnr, n_sob);
    $display("mechanisms: approx_products=%0d ecl_carry=%0d zero_taps=%0d sharpen_back_to_back=%0d clamp_high=%0d clamp_low=%0d sobel_clamp=%0d",
             n_approx, n_ecl_carry, n_zero_taps, n_shp_b2b, n_shp_hi, n_shp_lo, n_sob_clamp);
    check(n_shp == (IMG - 2) * (IMG - 2) && n_sob == (IMG - 2) * (IMG - 2), "every window produced an output");
    check(shp_lo_q.size() == 0 && sob_gx_q.size() == 0, "no output missing");
    check(n_approx > 0, "approximate products happened");
    check(n_ecl_carry > 0, "bias carry into bits [15:10] happened");
    check(n_zero_taps > 0, "zero taps skipped");
    check(n_shp_b2b > 0, "back-to-back windows");
    check(n_shp_hi > 0 && n_shp_lo > 0, "sharpening clamps");
    check(n_sob_clamp > 0, "Sobel clamp");
    $display("smoothing outputs=%0d PSNR=%0.2f dB against the exact filter", n_gss,
             10.0 * $log10(255.0 * 255.0 / (gss_sq_err / real'(n_gss))));
    check(n_gss == (IMG - 4) * (IMG - 4) && gss_lo_q.size() == 0, "every smoothing window produced an output");
    check(n_gss_b2b > 0, "smoothing windows back to back at 25 clocks");
    $display("DCT blocks=%0d in %0d clocks, max |error| vs double DCT=%0.2f", n_dct_blocks, dct_first, dct_max_err);
    check(n_dct_blocks == NDCT, "every DCT block produced");
    check(dct_first >= NDCT * 640 && dct_first <= NDCT * 640 + 2, "DCT takes 640 clocks per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
