// conv_mac: KxK convolution multiply-accumulate datapath built on one
// approximate multiplier; K = 3 by default (sharpening, Sobel), K = 5 for
// the 5x5 smoothing filter.
//
// One output needs K*K products. A single axm8x8 computes one per clock:
// tap k multiplies window pixel k by the magnitude of kernel coefficient k,
// and the signed accumulator adds or subtracts the product according to the
// coefficient's sign. Taps whose coefficient magnitude is 0 leave the
// accumulator unchanged, so the multiplier's correction bias is not added
// for terms that are zero by construction. The sum is shifted right
// arithmetically by `shift` (kernels are fixed-point with 2^shift as one)
// and also clamped to 0..255 as a pixel.
//
// Interface and timing:
//   in_valid/in_ready  window, kernel and shift are taken on a clock edge
//                      with both high; they are held inside, so the source
//                      may change them at once.
//   window, kernel     K*K taps, row by row, tap 0 at the top left.
//   out_valid          high for one cycle with result and pixel; it is set
//                      by the K*K-th clock edge after the accepting edge.
//   A new window is accepted on the cycle of the last tap, so back-to-back
//   windows complete one every K*K cycles (9 for 3x3, 25 for 5x5). There is
//   no output back-pressure.
//   Synchronous active-low reset.
// The source integrates the multiplier into a 3x3 sharpening MAC datapath
// and applies it in a 5x5 Gaussian filter but describes neither; the sequential one-multiplier structure, the
// sign-magnitude kernel, the zero-tap skip and the handshake are this
// design's own.
module conv_mac
  import axm_pkg::*;
#(
  parameter int unsigned K        = 3,
  parameter int unsigned ACC_BITS = 20
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [K*K-1:0][N_BITS-1:0] window,
  input  coef_t [K*K-1:0]            kernel,
  input  logic [3:0]                 shift,
  output logic                       out_valid,
  output logic signed [ACC_BITS-1:0] result,
  output logic [N_BITS-1:0]          pixel
);
  localparam int unsigned NT     = K * K;
  localparam int unsigned TAP_W  = $clog2(NT);

  logic [NT-1:0][N_BITS-1:0]  win_q;
  coef_t [NT-1:0]             ker_q;
  logic [3:0]                 shift_q;
  logic                       busy;
  logic [TAP_W-1:0]           tap;
  logic signed [ACC_BITS-1:0] acc, acc_next, shifted;
  logic [P_BITS-1:0]          prod, prod_raw;
  logic                       last, load;

  axm8x8 u_mul (.a(win_q[tap]), .b(ker_q[tap].mag), .raw_p(prod_raw), .p(prod));

  always_comb begin
    acc_next = acc;
    if (ker_q[tap].mag != '0) begin
      if (ker_q[tap].neg) acc_next = acc - ACC_BITS'(prod);
      else                acc_next = acc + ACC_BITS'(prod);
    end
  end

  assign last     = busy && (tap == TAP_W'(NT - 1));
  assign in_ready = !busy || last;
  assign load     = in_valid && in_ready;
  assign shifted  = acc_next >>> shift_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      tap       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      result    <= '0;
      pixel     <= '0;
      win_q     <= '0;
      ker_q     <= '0;
      shift_q   <= '0;
    end else begin
      out_valid <= last;
      if (last) begin
        result <= shifted;
        if (shifted < 0)                          pixel <= '0;
        else if (shifted > (1 << N_BITS) - 1)     pixel <= '1;
        else                                      pixel <= N_BITS'(shifted);
      end
      if (load) begin
        win_q   <= window;
        ker_q   <= kernel;
        shift_q <= shift;
        busy    <= 1'b1;
        tap     <= '0;
        acc     <= '0;
      end else if (busy) begin
        acc <= acc_next;
        tap <= tap + 1'b1;
        if (last) busy <= 1'b0;
      end
    end
  end

  // The raw product is only needed for error analysis at the multiplier.
  logic unused_raw;
  assign unused_raw = ^prod_raw;

  // A tap index beyond the kernel never reaches the multiplier.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> 32'(tap) < NT);
endmodule
