// tb_ax_c42: exhaustive check of the approximate 4:2 compressor.
// For all 32 input patterns the weighted output sum + 2*(carry + cout) is
// compared with the exact bit count minus the intended error: one when
// exactly one of i1,i2 and one of i3,i4 are set, plus one when the four-input
// sum bit and cin are both set. It also checks that the error is never
// positive, never above two, and that cout does not depend on cin.
module tb_ax_c42;
  logic i1, i2, i3, i4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  ax_c42 dut (.*);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exact, approx, err, xpair, s4, cout_nocin;
    int unsigned nerr = 0;
    for (int v = 0; v < 32; v++) begin
      {cin, i4, i3, i2, i1} = 5'(v);
      #1;
      exact  = i1 + i2 + i3 + i4 + cin;
      approx = sum + 2 * (carry + cout);
      xpair  = ((i1 != i2) && (i3 != i4)) ? 1 : 0;
      s4     = ((i1 + i2 + i3 + i4) % 2 == 1 || xpair == 1) ? 1 : 0;
      err    = xpair + ((s4 == 1 && cin == 1'b1) ? 1 : 0);
      checks++;
      if (approx + err != exact) begin
        failures++;
        $display("FAIL %b%b%b%b cin=%b: got %0d expected %0d", i1, i2, i3, i4, cin, approx, exact - err);
      end
      checks++;
      if (approx > exact || exact - approx > 2) begin
        failures++;
        $display("FAIL error bound at %b%b%b%b cin=%b", i1, i2, i3, i4, cin);
      end
      if (approx != exact) nerr++;
      cout_nocin = cout;
      cin = ~cin;
      #1;
      checks++;
      if (cout != cout_nocin) begin
        failures++;
        $display("FAIL cout depends on cin");
      end
    end
    checks++;
    if (nerr != 16) begin
      failures++;
      $display("FAIL %0d erroneous patterns, expected 16", nerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
