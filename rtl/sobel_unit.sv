// sobel_unit: Sobel edge detector for one 3x3 window.
//
// Two conv_mac datapaths run side by side on the same window, one with
// the horizontal-gradient kernel Gx = [-1 0 1; -2 0 2; -1 0 1], one with
// the vertical kernel Gy = [-1 -2 -1; 0 0 0; 1 2 1]. The edge strength is
// |Gx| + |Gy|, clamped to 255. Each product comes from the approximate
// multiplier; zero taps are skipped by the datapaths.
//
// Interface and timing: in_valid/in_ready accept a window (both MACs take
// it on the same edge); out_valid pulses 9 cycles later with gx, gy and the
// magnitude; one window every 9 cycles back to back. Synchronous active-low
// reset. The kernels and the two-convolution structure follow the source;
// the |Gx| + |Gy| magnitude and its clamp are this design's choice, since
// the source does not say how the two gradients are combined.
module sobel_unit
  import axm_pkg::*;
#(
  parameter int unsigned ACC_BITS = 20
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  window_t                    window,
  output logic                       out_valid,
  output logic signed [ACC_BITS-1:0] gx,
  output logic signed [ACC_BITS-1:0] gy,
  output logic [N_BITS-1:0]          magnitude
);
  // Tap order is row by row from the top left; index 0 is the top left tap.
  localparam kernel_t KX = '{
    '{1'b0, 8'd1}, '{1'b0, 8'd0}, '{1'b1, 8'd1},   // taps 8,7,6: bottom row
    '{1'b0, 8'd2}, '{1'b0, 8'd0}, '{1'b1, 8'd2},   // taps 5,4,3: middle row
    '{1'b0, 8'd1}, '{1'b0, 8'd0}, '{1'b1, 8'd1}    // taps 2,1,0: top row
  };
  localparam kernel_t KY = '{
    '{1'b0, 8'd1}, '{1'b0, 8'd2}, '{1'b0, 8'd1},
    '{1'b0, 8'd0}, '{1'b0, 8'd0}, '{1'b0, 8'd0},
    '{1'b1, 8'd1}, '{1'b1, 8'd2}, '{1'b1, 8'd1}
  };

  logic                       rdy_x, rdy_y, vld_x, vld_y;
  logic [N_BITS-1:0]          pix_x, pix_y;
  logic [ACC_BITS-1:0]        abs_x, abs_y;
  logic [ACC_BITS:0]          mag_sum;

  conv_mac #(.K(3), .ACC_BITS(ACC_BITS)) u_gx (
    .clk, .rst_n, .in_valid, .in_ready(rdy_x), .window, .kernel(KX), .shift(4'd0),
    .out_valid(vld_x), .result(gx), .pixel(pix_x));

  conv_mac #(.K(3), .ACC_BITS(ACC_BITS)) u_gy (
    .clk, .rst_n, .in_valid, .in_ready(rdy_y), .window, .kernel(KY), .shift(4'd0),
    .out_valid(vld_y), .result(gy), .pixel(pix_y));

  assign in_ready  = rdy_x && rdy_y;
  assign out_valid = vld_x;

  always_comb begin
    abs_x     = gx[ACC_BITS-1] ? ACC_BITS'(-gx) : ACC_BITS'(gx);
    abs_y     = gy[ACC_BITS-1] ? ACC_BITS'(-gy) : ACC_BITS'(gy);
    mag_sum   = {1'b0, abs_x} + {1'b0, abs_y};
    magnitude = (mag_sum > (ACC_BITS+1)'((1 << N_BITS) - 1)) ? '1 : N_BITS'(mag_sum);
  end

  // The clamped pixels are not used: edge strength is built from gx and gy.
  logic unused_pix;
  assign unused_pix = ^{pix_x, pix_y};

  // Both datapaths see the same handshake, so they stay in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) rdy_x == rdy_y && vld_x == vld_y);
endmodule
