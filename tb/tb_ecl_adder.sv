// tb_ecl_adder: the corrected value must be raw + 0x42 (mod 2^16) for every
// 16-bit input, which covers the carry out of the ten-bit ripple adder into
// the upper bits. Also checks a non-default bias.
module tb_ecl_adder;
  logic [15:0] raw, corrected, corrected_b;
  int checks = 0, failures = 0;

  ecl_adder dut (.raw, .corrected);
  ecl_adder #(.BIAS(16'h03FF)) dut_b (.raw, .corrected(corrected_b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned upper_carry = 0;
    for (int v = 0; v < 65536; v++) begin
      raw = 16'(v);
      #1;
      checks++;
      if (corrected != 16'(v + 'h42)) begin
        failures++;
        $display("FAIL raw=%h got %h", raw, corrected);
      end
      checks++;
      if (corrected_b != 16'(v + 'h3FF)) begin
        failures++;
        $display("FAIL bias 3FF raw=%h got %h", raw, corrected_b);
      end
      if (corrected[15:10] != raw[15:10]) upper_carry++;
    end
    checks++;
    if (upper_carry == 0) begin
      failures++;
      $display("FAIL carry into the upper bits never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
