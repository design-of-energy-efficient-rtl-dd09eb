// tb_dadda_tree: the reduction tree must preserve the weighted sum of its
// inputs when all compressors are exact (APPROX_COLS = 0), for random
// partial-product matrices (not only those of a real product) and the
// all-ones matrix. With the default approximate low columns, row0 + row1 may
// only under-count, by at most 2 per approximate compressor position
// weight, and must be exact when the low eight columns are all zero.
module tb_dadda_tree;
  logic [7:0][7:0] pp;
  logic [15:0] r0, r1, e0, e1;
  int checks = 0, failures = 0;

  dadda_tree dut (.pp, .row0(r0), .row1(r1));
  dadda_tree #(.APPROX_COLS(0)) dut_exact (.pp, .row0(e0), .row1(e1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned weighted(logic [7:0][7:0] m);
    int unsigned t = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (m[i][j]) t += 1 << (i + j);
    return t;
  endfunction

  initial begin
    int unsigned w, sa, se, under = 0;
    for (int n = 0; n < 5000; n++) begin
      if (n == 0) pp = '1;
      else if (n == 1) pp = '0;
      else pp = {$urandom, $urandom};
      if (n >= 2500)  // low columns empty: the approximate cells see only zeros
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            if (i + j < 8) pp[i][j] = 1'b0;
      #1;
      w  = weighted(pp);
      se = 32'(e0) + 32'(e1);
      sa = 32'(r0) + 32'(r1);
      checks++;
      if (se != w) begin
        failures++;
        $display("FAIL exact tree: %0d expected %0d", se, w);
      end
      checks++;
      if (sa > w || w - sa > 2 * 255 * 4) begin
        failures++;
        $display("FAIL approximate tree out of bounds: %0d vs %0d", sa, w);
      end
      if (sa != w) under++;
      if (n >= 2500) begin
        checks++;
        if (sa != w) begin
          failures++;
          $display("FAIL approximate tree with empty low columns: %0d vs %0d", sa, w);
        end
      end
    end
    checks++;
    if (under == 0) begin
      failures++;
      $display("FAIL approximation never changed a result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
