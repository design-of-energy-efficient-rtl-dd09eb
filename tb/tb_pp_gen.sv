// tb_pp_gen: checks the AND array bit by bit for random and corner operands,
// with all 64 partial products kept (default) and with the two lowest
// columns truncated.
module tb_pp_gen;
  logic [7:0] a, b;
  logic [7:0][7:0] pp, pp_t;
  int checks = 0, failures = 0;

  pp_gen dut (.a, .b, .pp);
  pp_gen #(.TRUNC_COLS(2)) dut_t (.a, .b, .pp(pp_t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      if (n == 0) begin a = 8'hFF; b = 8'hFF; end
      else if (n == 1) begin a = 8'h00; b = 8'hFF; end
      else begin a = 8'($urandom); b = 8'($urandom); end
      #1;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (pp[i][j] != (a[j] && b[i])) begin
            failures++;
            $display("FAIL pp[%0d][%0d] a=%h b=%h", i, j, a, b);
          end
          checks++;
          if (pp_t[i][j] != ((i + j >= 2) ? (a[j] && b[i]) : 1'b0)) begin
            failures++;
            $display("FAIL truncated pp[%0d][%0d] a=%h b=%h", i, j, a, b);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
