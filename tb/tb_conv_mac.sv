// tb_conv_mac: self-checking test of the one-multiplier convolution MAC at
// its default size, 3x3, with a second instance at 5x5.
// Phase 1 uses kernels whose magnitudes are 0 or powers of two, for which
// the approximate multiplier's raw product is exact, so every product is
// exactly x * c + 0x42 and the expected result and clamped pixel can be
// computed here. Phase 2 uses arbitrary kernels and checks the result stays
// within the multiplier's error bound of that value. The testbench checks
// the 9-cycle latency of every output, one output every 9 cycles while
// windows arrive back to back, and counts zero taps, subtracted taps and
// both clamps. The 5x5 instance gets 30 back-to-back windows with
// power-of-two kernels; its results must be exact, 25 cycles apart, with
// out_valid set by the 25th edge after the accept.
module tb_conv_mac;
  import axm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  window_t window;
  kernel_t kernel;
  logic [3:0] shift;
  logic signed [19:0] result;
  logic [7:0] pixel;
  int checks = 0, failures = 0;
  longint cycle = 0;

  conv_mac dut (.*);

  // 5x5 instance
  logic in_valid5 = 1'b0, in_ready5, out_valid5;
  logic [24:0][7:0] window5;
  coef_t [24:0] kernel5;
  logic [3:0] shift5;
  logic signed [19:0] result5;
  logic [7:0] pixel5;
  bit k5_done = 1'b0;
  longint q5_value[$], q5_accepted[$];
  int n5_out = 0, n5_b2b = 0;
  longint last5 = -100;

  conv_mac #(.K(5)) dut5 (
    .clk, .rst_n, .in_valid(in_valid5), .in_ready(in_ready5), .window(window5),
    .kernel(kernel5), .shift(shift5), .out_valid(out_valid5), .result(result5),
    .pixel(pixel5)
  );

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
    longint value;     // expected result
    bit     exact;     // value is exact (phase 1) or a bound centre (phase 2)
    longint accepted;  // cycle of the accepting edge
  } exp_t;
  exp_t q[$];
  int n_zero = 0, n_neg = 0, n_lo = 0, n_hi = 0, n_out = 0, n_b2b = 0;
  longint last_out = -100;

  function automatic longint model(window_t w, kernel_t k, logic [3:0] sh);
    longint acc = 0;
    for (int t = 0; t < TAPS; t++)
      if (k[t].mag != 0) begin
        if (k[t].neg) acc -= longint'(w[t]) * longint'(k[t].mag) + 66;
        else          acc += longint'(w[t]) * longint'(k[t].mag) + 66;
      end
    return acc >>> sh;
  endfunction

  // Accepts are recorded on the clock edge that takes the window.
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    exp_t e;
    e.value = model(window, kernel, shift);
    e.exact = (phase == 1);
    e.accepted = cycle;
    q.push_back(e);
    for (int t = 0; t < TAPS; t++) begin
      if (kernel[t].mag == 0) n_zero++;
      else if (kernel[t].neg) n_neg++;
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    longint pix;
    n_out++;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL output without input");
    end else begin
      e = q.pop_front();
      checks++;
      if (cycle - e.accepted != 10) begin  // out_valid set by the 9th edge after the accept
        failures++;
        $display("FAIL latency %0d", cycle - e.accepted);
      end
      if (cycle - last_out == 9) n_b2b++;
      last_out = cycle;
      checks++;
      if (e.exact) begin
        if (longint'(result) != e.value) begin
          failures++;
          $display("FAIL result %0d expected %0d", result, e.value);
        end
        pix = (e.value < 0) ? 0 : (e.value > 255) ? 255 : e.value;
        if (e.value < 0) n_lo++;
        if (e.value > 255) n_hi++;
        checks++;
        if (longint'(pixel) != pix) begin
          failures++;
          $display("FAIL pixel %0d expected %0d", pixel, pix);
        end
      end else if (longint'(result) - e.value > 9 * 624 || e.value - longint'(result) > 9 * 624) begin
        // each of the nine raw products is at most 624 below its exact value
        failures++;
        $display("FAIL result %0d outside bound of %0d", result, e.value);
      end
    end
  end

  always @(posedge clk) if (rst_n && in_valid5 && in_ready5) begin
    longint acc;
    acc = 0;
    for (int t = 0; t < 25; t++)
      if (kernel5[t].mag != 0) begin
        if (kernel5[t].neg) acc -= longint'(window5[t]) * longint'(kernel5[t].mag) + 66;
        else                acc += longint'(window5[t]) * longint'(kernel5[t].mag) + 66;
      end
    q5_value.push_back(acc >>> shift5);
    q5_accepted.push_back(cycle);
  end

  always @(posedge clk) if (rst_n && out_valid5) begin
    longint v, a;
    n5_out++;
    checks++;
    if (q5_value.size() == 0) begin
      failures++;
      $display("FAIL 5x5 output without input");
    end else begin
      v = q5_value.pop_front();
      a = q5_accepted.pop_front();
      checks += 2;
      if (cycle - a != 26) begin
        failures++;
        $display("FAIL 5x5 latency %0d", cycle - a);
      end
      if (longint'(result5) != v) begin
        failures++;
        $display("FAIL 5x5 result %0d expected %0d", result5, v);
      end
      if (cycle - last5 == 25) n5_b2b++;
      last5 = cycle;
    end
  end

  initial begin
    window5 = '0; kernel5 = '0; shift5 = '0;
    wait (rst_n);
    @(negedge clk);
    in_valid5 = 1'b1;
    for (int n = 0; n < 30; n++) begin
      for (int t = 0; t < 25; t++) begin
        window5[t] = 8'($urandom);
        kernel5[t].neg = 1'($urandom);
        // magnitudes up to 32 keep 25 taps inside the 20-bit accumulator
        kernel5[t].mag = ($urandom_range(0, 3) == 0) ? 8'd0 : 8'(1 << $urandom_range(0, 5));
      end
      shift5 = 4'($urandom_range(0, 8));
      @(posedge clk);
      while (!in_ready5) @(posedge clk);
      @(negedge clk);
    end
    in_valid5 = 1'b0;
    repeat (40) @(negedge clk);
    k5_done = 1'b1;
  end

  int phase = 1;

  task automatic random_input(bit pow2);
    for (int t = 0; t < TAPS; t++) begin
      window[t] = 8'($urandom);
      kernel[t].neg = 1'($urandom);
      if (pow2) kernel[t].mag = ($urandom_range(0, 3) == 0) ? 8'd0 : 8'(1 << $urandom_range(0, 7));
      else      kernel[t].mag = 8'($urandom);
    end
    shift = 4'($urandom_range(0, 8));
  endtask

  initial begin
    window = '0; kernel = '0; shift = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1a: gaps between windows
    for (int n = 0; n < 40; n++) begin
      random_input(1'b1);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    // phase 1b: back to back, new window as soon as one is taken
    in_valid = 1'b1;
    for (int n = 0; n < 60; n++) begin
      random_input(1'b1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    phase = 2;
    for (int n = 0; n < 60; n++) begin
      random_input(1'b0);
      shift = '0;
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (20) @(negedge clk);
    wait (k5_done);
    checks++;
    if (q5_value.size() != 0 || n5_out != 30 || n5_b2b != 29) begin
      failures++;
      $display("FAIL 5x5: %0d outputs, %0d back to back, %0d missing", n5_out, n5_b2b, q5_value.size());
    end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("outputs=%0d back_to_back=%0d zero_taps=%0d negative_taps=%0d clamp_low=%0d clamp_high=%0d",
             n_out, n_b2b, n_zero, n_neg, n_lo, n_hi);
    checks++;
    if (n_out != 160 || n_b2b == 0 || n_zero == 0 || n_neg == 0 || n_lo == 0 || n_hi == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
