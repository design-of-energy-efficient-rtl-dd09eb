// tb_exact_c42: exhaustive check of the exact 4:2 compressor: for all 32
// input patterns sum + 2*(carry + cout) must equal the number of set inputs,
// and cout must not change with cin.
module tb_exact_c42;
  logic i1, i2, i3, i4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  exact_c42 dut (.*);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic co0;
    for (int v = 0; v < 32; v++) begin
      {cin, i4, i3, i2, i1} = 5'(v);
      #1;
      checks++;
      if (32'(sum) + 2 * (32'(carry) + 32'(cout)) != $countones(v)) begin
        failures++;
        $display("FAIL pattern %b", v[4:0]);
      end
      co0 = cout;
      cin = ~cin;
      #1;
      checks++;
      if (cout != co0) begin
        failures++;
        $display("FAIL cout depends on cin at %b", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
