// tb_dct8x8: 8x8 DCT blocks through two instances side by side, the default
// (approximate multiplier) and one with an exact multiplier (no approximate
// columns, no bias).
//   * The exact instance must match, bit for bit, a model here that follows
//     the documented number formats with exact products and coefficients
//     computed from the cosine formula.
//   * The approximate instance must stay within a bound of the exact one;
//     both are compared with a double-precision DCT and the errors printed.
//   * The first coefficient must come 513 clocks after the last pixel, and
//     64 coefficients on consecutive clocks with out_last on the 64th.
// Blocks: flat mid-grey (every product skipped), flat black (butterfly
// clamp), a ramp, a checkerboard, smooth and random blocks, sent back to
// back.
module tb_dct8x8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_ready_x;
  logic [7:0] in_pixel;
  logic out_valid, out_last, out_valid_x, out_last_x;
  logic signed [11:0] out_coef, out_coef_x;
  int checks = 0, failures = 0;
  longint cycle = 0;

  dct8x8 dut (.clk, .rst_n, .in_valid, .in_ready, .in_pixel, .out_valid, .out_last, .out_coef);
  dct8x8 #(.APPROX_COLS(0), .BIAS(16'h0000)) dut_x (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_x), .in_pixel,
    .out_valid(out_valid_x), .out_last(out_last_x), .out_coef(out_coef_x));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NBLK = 8;
  int blk [NBLK][64];
  int model [NBLK][64];
  real dref [NBLK][64];
  int n_clamp = 0, n_skip = 0;

  function automatic int cq(int k, int n);  // C[k][n] * 512, rounded
    real a = (k == 0) ? $sqrt(1.0 / 8.0) : 0.5;
    real v = 512.0 * a * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int rsh7(int x);  // (x + 64) >>> 7
    return (x + 64) >>> 7;
  endfunction

  // one 8-point pass on v[], following the documented formats
  task automatic pass8(input int v[8], input bit col, output int y[8]);
    for (int k = 0; k < 8; k++) begin
      int acc = 0;
      for (int i = 0; i < 4; i++) begin
        int sd = (k % 2 == 0) ? v[i] + v[7 - i] : v[i] - v[7 - i];
        int mag = sd < 0 ? -sd : sd;
        if (col) mag = (mag + 8) >> 4;
        else if (mag > 255) begin mag = 255; n_clamp++; end
        if (mag == 0) n_skip++;
        else acc += (sd < 0 ? -mag : mag) * cq(k, i);
      end
      y[k] = rsh7(acc);
    end
  endtask

  task automatic make_model(int b);
    int t[64];
    int v[8], y[8];
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) v[n] = blk[b][8 * r + n] - 128;
      pass8(v, 1'b0, y);
      for (int k = 0; k < 8; k++) t[8 * r + k] = y[k];
    end
    for (int c = 0; c < 8; c++) begin
      for (int n = 0; n < 8; n++) v[n] = t[8 * n + c];
      pass8(v, 1'b1, y);
      for (int u = 0; u < 8; u++) model[b][8 * u + c] = y[u];
    end
    for (int u = 0; u < 8; u++)
      for (int w = 0; w < 8; w++) begin
        real s = 0.0;
        for (int x = 0; x < 8; x++)
          for (int z = 0; z < 8; z++)
            s += (blk[b][8 * x + z] - 128)
                 * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0)
                 * $cos((2.0 * z + 1.0) * w * 3.14159265358979 / 16.0);
        dref[b][8 * u + w] = s * ((u == 0) ? $sqrt(0.125) : 0.5) * ((w == 0) ? $sqrt(0.125) : 0.5);
      end
  endtask

  // output checking
  int ob = 0, oi = 0, max_ax = 0;
  real max_xd = 0.0, max_ad = 0.0, sq_ax = 0.0;
  longint last_in = 0, prev_out = 0;

  always @(posedge clk) if (rst_n && in_valid && in_ready) last_in <= cycle;

  always @(posedge clk) if (rst_n && out_valid) begin
    int d;
    real e;
    if (oi == 0) begin
      checks++;
      if (cycle - last_in != 513) begin
        failures++;
        $display("FAIL latency %0d", cycle - last_in);
      end
    end else begin
      checks++;
      if (cycle - prev_out != 1) begin failures++; $display("FAIL gap in output"); end
    end
    prev_out = cycle;
    checks++;
    if (!out_valid_x || out_last != (oi == 63) || out_last_x != out_last) begin
      failures++;
      $display("FAIL output framing at %0d", oi);
    end
    checks++;
    if (int'(out_coef_x) != model[ob][oi]) begin
      failures++;
      $display("FAIL block %0d coef %0d: exact instance %0d, model %0d", ob, oi, out_coef_x, model[ob][oi]);
    end
    d = int'(out_coef) - int'(out_coef_x);
    if (d < 0) d = -d;
    if (d > max_ax) max_ax = d;
    sq_ax += real'(d * d);
    checks++;
    if (d > 20) begin
      failures++;
      $display("FAIL block %0d coef %0d: approximate %0d, exact %0d", ob, oi, out_coef, out_coef_x);
    end
    e = real'(out_coef_x) - dref[ob][oi]; if (e < 0) e = -e; if (e > max_xd) max_xd = e;
    e = real'(out_coef) - dref[ob][oi];   if (e < 0) e = -e; if (e > max_ad) max_ad = e;
    oi++;
    if (oi == 64) begin oi = 0; ob++; end
  end

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++)
        case (b)
          0: blk[b][i] = 128;
          1: blk[b][i] = 0;
          2: blk[b][i] = 4 * i;
          3: blk[b][i] = (((i / 8) + (i % 8)) % 2 == 1) ? 255 : 0;
          4: blk[b][i] = 100 + 10 * (i / 8) - 3 * (i % 8);
          default: blk[b][i] = $urandom_range(0, 255);
        endcase
    for (int b = 0; b < NBLK; b++) make_model(b);
    in_pixel = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        in_pixel = 8'(blk[b][i]);
        in_valid = 1'b1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 1'b0;
      end
    while (ob < NBLK) @(negedge clk);
    $display("blocks=%0d exact-multiplier max |error| vs double DCT=%0.2f; approximate: max |error| vs double=%0.2f, max |diff| vs exact multiplier=%0d, rms diff=%0.2f",
             ob, max_xd, max_ad, max_ax, $sqrt(sq_ax / (NBLK * 64.0)));
    $display("mechanisms: butterfly clamps=%0d skipped products=%0d", n_clamp, n_skip);
    checks++;
    if (max_xd > 8.0 || n_clamp == 0 || n_skip == 0 || in_ready != in_ready_x) begin
      failures++;
      $display("FAIL exact-multiplier accuracy or a mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
