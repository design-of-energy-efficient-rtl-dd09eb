// tb_axm8x8_full: exhaustive test of the multiplier at its default
// configuration: all 65536 operand pairs.
//   * p must equal raw_p + 0x0042 and raw_p may never exceed a * b.
//   * Sixteen products are compared with values from an independent
//     bit-accurate model of the default configuration.
//   * The error statistics over all pairs (sum of errors, sum of absolute
//     errors, number of erroneous pairs, extremes, and a product checksum)
//     must match the same model exactly; they are also printed as MED,
//     NMED and error rate. MRED (mean of |error| / (a * b) over the pairs
//     whose exact product is non-zero) is printed as well.
module tb_axm8x8_full;
  logic [7:0]  a, b;
  logic [15:0] raw_p, p;
  int checks = 0, failures = 0;
  real sum_rel = 0.0;

  axm8x8 dut (.a, .b, .raw_p, .p);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic [7:0]  a;
    logic [7:0]  b;
    logic [15:0] raw;
  } vec_t;

  localparam vec_t GOLDEN [16] = '{
    '{8'd255, 8'd255, 16'd64945}, '{8'd0,   8'd0,   16'd0},
    '{8'd0,   8'd255, 16'd0},     '{8'd1,   8'd1,   16'd1},
    '{8'd128, 8'd128, 16'd16384}, '{8'd170, 8'd85,  16'd13994},
    '{8'd15,  8'd15,  16'd209},   '{8'd200, 8'd3,   16'd600},
    '{8'd165, 8'd77,  16'd12545}, '{8'd202, 8'd24,  16'd4848},
    '{8'd37,  8'd48,  16'd1776},  '{8'd187, 8'd29,  16'd5167},
    '{8'd109, 8'd19,  16'd2055},  '{8'd44,  8'd222, 16'd9640},
    '{8'd214, 8'd35,  16'd7426},  '{8'd123, 8'd46,  16'd5514}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (a=%0d b=%0d raw=%0d p=%0d)", what, a, b, raw_p, p);
    end
  endtask

  initial begin
    automatic longint sum_err = 0, sum_abs = 0, min_err = 0, max_err = 0, e;
    automatic longint unsigned nerr = 0;
    automatic logic [31:0] chk = '0;
    foreach (GOLDEN[k]) begin
      a = GOLDEN[k].a; b = GOLDEN[k].b;
      #1;
      check(raw_p == GOLDEN[k].raw, "golden raw product");
      check(p == 16'(GOLDEN[k].raw + 16'h0042), "golden corrected product");
    end
    for (int ia = 0; ia < 256; ia++)
      for (int ib = 0; ib < 256; ib++) begin
        a = 8'(ia); b = 8'(ib);
        #1;
        check(p == 16'(raw_p + 16'h0042), "p = raw_p + 0x42");
        check(int'(raw_p) <= ia * ib, "raw product never above exact");
        e = longint'(p) - longint'(ia * ib);
        sum_err += e;
        sum_abs += (e < 0) ? -e : e;
        if (ia * ib != 0) sum_rel += real'((e < 0) ? -e : e) / real'(ia * ib);
        if (e != 0) nerr++;
        if (e < min_err) min_err = e;
        if (e > max_err) max_err = e;
        chk ^= 32'(longint'(p) * longint'(ia * 256 + ib + 1));
      end
    $display("MED=%0.2f NMED=%0.5f ER=%0.2f%% mean=%0.2f min=%0d max=%0d",
             real'(sum_abs) / 65536.0, real'(sum_abs) / 65536.0 / 65535.0,
             100.0 * real'(nerr) / 65536.0, real'(sum_err) / 65536.0, min_err, max_err);
    $display("MRED=%0.5f over the 65025 non-zero products", sum_rel / 65025.0);
    check(sum_err == -64'sd3399296, "sum of errors");
    check(sum_abs == 64'sd6399892, "sum of absolute errors");
    check(nerr == 65536, "erroneous pairs");
    check(min_err == -558 && max_err == 66, "error extremes");
    check(chk == 32'd1777121280, "product checksum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
