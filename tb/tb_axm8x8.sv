// tb_axm8x8: end-to-end test of the multiplier over all 65536 operand pairs,
// in three configurations side by side:
//   dut        default: approximate columns [7:0], bias 0x0042
//   dut_exact  APPROX_COLS = 0, BIAS = 0: must equal a * b everywhere
//   dut_trunc  default plus two truncated columns
// It counts how often each mechanism acts and fails if one never does:
// an approximate compressor lowering the product, the error correction
// carrying into bits [15:10], truncation changing the product, and products
// that come out exact despite the approximation.
module tb_axm8x8;
  logic [7:0]  a, b;
  logic [15:0] raw_p, p, raw_x, p_x, raw_t, p_t;
  int checks = 0, failures = 0;
  int unsigned n_approx = 0, n_ecl_carry = 0, n_trunc = 0, n_exact = 0;
  longint sum_abs = 0;

  axm8x8 dut (.a, .b, .raw_p, .p);
  axm8x8 #(.APPROX_COLS(0), .BIAS(16'h0000)) dut_exact (.a, .b, .raw_p(raw_x), .p(p_x));
  axm8x8 #(.TRUNC_COLS(2)) dut_trunc (.a, .b, .raw_p(raw_t), .p(p_t));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (a=%0d b=%0d)", what, a, b);
    end
  endtask

  initial begin
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia); b = 8'(ib);
        #1;
        check(int'(p_x) == ia * ib, "exact configuration equals a*b");
        check(p_x == raw_x, "zero bias leaves the product unchanged");
        check(int'(raw_p) <= ia * ib && ia * ib - int'(raw_p) <= 624, "approximate error one-sided and bounded");
        check(p == 16'(raw_p + 16'h0042), "bias added");
        check(p_t == 16'(raw_t + 16'h0042), "bias added, truncated variant");
        check(raw_t <= raw_p + 16'd9, "truncation removes at most the two lowest columns' weight");
        if (int'(raw_p) != ia * ib) n_approx++;
        else n_exact++;
        if (p[15:10] != raw_p[15:10]) n_ecl_carry++;
        if (raw_t != raw_p) n_trunc++;
        sum_abs += longint'(ia * ib) - longint'(raw_p);
      end
    $display("approximate=%0d exact=%0d ecl_carry=%0d truncation=%0d raw MED=%0.2f",
             n_approx, n_exact, n_ecl_carry, n_trunc, real'(sum_abs) / 65536.0);
    check(n_approx > 0, "approximation happened");
    check(n_exact > 0, "some products exact");
    check(n_ecl_carry > 0, "ECL carry into the upper bits happened");
    check(n_trunc > 0, "truncation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
