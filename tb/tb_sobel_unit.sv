// tb_sobel_unit: Sobel edge strength for random windows and for flat,
// vertical-edge and horizontal-edge windows. The Sobel coefficients are 1
// and 2, for which the approximate multiplier's raw product is exact, and
// every gradient has three added and three subtracted taps, so the
// correction bias cancels: gx, gy and the magnitude must equal the exact
// Sobel values. Checks the 9-cycle latency and that the magnitude clamp and
// both gradient signs occur.
module tb_sobel_unit;
  import axm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  window_t window;
  logic signed [19:0] gx, gy;
  logic [7:0] magnitude;
  int checks = 0, failures = 0;
  longint cycle = 0;

  sobel_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int     gx, gy, mag;
    longint accepted;
  } exp_t;
  exp_t q[$];
  int n_clamp = 0, n_gx_neg = 0, n_gy_neg = 0, n_out = 0;

  function automatic int px(window_t w, int r, int c);
    return int'(w[3 * r + c]);
  endfunction

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    exp_t e;
    e.gx = px(window,0,2) + 2*px(window,1,2) + px(window,2,2) - px(window,0,0) - 2*px(window,1,0) - px(window,2,0);
    e.gy = px(window,2,0) + 2*px(window,2,1) + px(window,2,2) - px(window,0,0) - 2*px(window,0,1) - px(window,0,2);
    e.mag = (e.gx < 0 ? -e.gx : e.gx) + (e.gy < 0 ? -e.gy : e.gy);
    if (e.mag > 255) e.mag = 255;
    e.accepted = cycle;
    q.push_back(e);
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    n_out++;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL output without input");
    end else begin
      e = q.pop_front();
      checks++;
      if (cycle - e.accepted != 10) begin
        failures++;
        $display("FAIL latency %0d", cycle - e.accepted);
      end
      checks++;
      if (int'(gx) != e.gx || int'(gy) != e.gy || int'(magnitude) != e.mag) begin
        failures++;
        $display("FAIL gx=%0d gy=%0d mag=%0d expected %0d %0d %0d", gx, gy, magnitude, e.gx, e.gy, e.mag);
      end
      if (e.mag == 255) n_clamp++;
      if (e.gx < 0) n_gx_neg++;
      if (e.gy < 0) n_gy_neg++;
    end
  end

  initial begin
    window = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b1;
    for (int n = 0; n < 200; n++) begin
      for (int t = 0; t < TAPS; t++) begin
        case (n % 5)
          0: window[t] = 8'd90;                                  // flat
          1: window[t] = (t % 3 == 2) ? 8'd200 : 8'd20;          // vertical edge
          2: window[t] = (t < 3) ? 8'd180 : 8'd170;              // weak horizontal edge
          default: window[t] = 8'($urandom_range(0, 40) + 100 * (t / 3 == n % 3));
        endcase
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    $display("outputs=%0d clamped=%0d gx_negative=%0d gy_negative=%0d", n_out, n_clamp, n_gx_neg, n_gy_neg);
    checks++;
    if (n_out != 200 || n_clamp == 0 || n_gx_neg == 0 || n_gy_neg == 0 || q.size() != 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised or an output is missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
