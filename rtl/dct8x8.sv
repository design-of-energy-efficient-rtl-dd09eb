// dct8x8: 8x8 two-dimensional DCT of an image block, row-column separable,
// with every multiplication done by one approximate multiplier.
//
// Each 8-point pass first forms the butterfly sums s_i = v_i + v_(7-i) and
// differences d_i = v_i - v_(7-i) (i = 0..3). The even outputs are then
// X_k = sum_i C[k][i] * s_i and the odd outputs X_k = sum_i C[k][i] * d_i,
// with C[k][n] = a_k cos((2n+1) k pi / 16), a_0 = sqrt(1/8), a_k = 1/2
// (orthonormal DCT-II), held as sign and magnitude scaled by 2^9. That is
// four products per output, 32 per 8-point transform, 512 per block. One
// axm8x8 does one product per clock; a signed accumulator adds or
// subtracts it. A product whose data operand is 0 is skipped.
//
// Number formats (this design's own, to fit the 8-bit unsigned multiplier):
//   row pass     pixels are level-shifted by -128; |s_i| and |d_i| are at
//                most 256 and are clamped to 255; each row result is
//                (acc + 64) >>> 7, i.e. the coefficient with two fraction
//                bits, stored in a 64-entry transpose buffer.
//   column pass  the butterflies of the stored values are below 2900 in
//                magnitude and enter the multiplier as (|x| + 8) >> 4, a
//                rounded sixteenth; the final
//                coefficient is (acc + 64) >>> 7, an integer in -1024..1023.
//
// Interface and timing (single block at a time, synchronous active-low
// reset):
//   in_valid/in_ready, in_pixel  64 pixels, row by row; in_ready is high
//                                while the block buffer is being filled.
//   then 256 cycles of row pass and 256 of column pass;
//   out_valid, out_coef, out_last  64 coefficients, Z[u][v] with u the
//                                vertical and v the horizontal frequency,
//                                in order u*8+v, one per clock, no
//                                back-pressure. The first appears 513 clock
//                                edges after the edge that took the last
//                                pixel. A new block is taken after the last.
// The row-column separable 8-point DCT, the butterfly stage before the
// multiplications and the use of the approximate multiplier follow the
// source; the schedule, the number formats and the interface are this
// design's own.
module dct8x8
  import axm_pkg::*;
#(
  parameter int unsigned       APPROX_COLS = AXM_APPROX_COLS,
  parameter logic [P_BITS-1:0] BIAS        = ECL_BIAS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [N_BITS-1:0]  in_pixel,
  output logic               out_valid,
  output logic               out_last,
  output logic signed [11:0] out_coef
);
  typedef enum logic [1:0] {S_LOAD, S_ROW, S_COL, S_OUT} state_t;

  // C[k][i] * 512 for k = 0..7, i = 0..3, rounded; see the header formula.
  localparam coef_t COEF [8][4] = '{
    '{'{1'b0, 8'd181}, '{1'b0, 8'd181}, '{1'b0, 8'd181}, '{1'b0, 8'd181}},
    '{'{1'b0, 8'd251}, '{1'b0, 8'd213}, '{1'b0, 8'd142}, '{1'b0, 8'd50}},
    '{'{1'b0, 8'd237}, '{1'b0, 8'd98},  '{1'b1, 8'd98},  '{1'b1, 8'd237}},
    '{'{1'b0, 8'd213}, '{1'b1, 8'd50},  '{1'b1, 8'd251}, '{1'b1, 8'd142}},
    '{'{1'b0, 8'd181}, '{1'b1, 8'd181}, '{1'b1, 8'd181}, '{1'b0, 8'd181}},
    '{'{1'b0, 8'd142}, '{1'b1, 8'd251}, '{1'b0, 8'd50},  '{1'b0, 8'd213}},
    '{'{1'b0, 8'd98},  '{1'b1, 8'd237}, '{1'b0, 8'd237}, '{1'b1, 8'd98}},
    '{'{1'b0, 8'd50},  '{1'b1, 8'd142}, '{1'b0, 8'd213}, '{1'b1, 8'd251}}
  };

  state_t             state;
  logic [5:0]         idx;       // load and output position
  logic [7:0]         cnt;       // {line, k, tap} during the passes
  logic [2:0]         line, k;
  logic [1:0]         tap;
  logic [N_BITS-1:0]  pix_mem [64];
  logic signed [11:0] tbuf    [64];
  logic signed [11:0] obuf    [64];

  logic signed [12:0] va, vb, sd;
  logic [12:0]        sd_mag;
  logic [N_BITS-1:0]  op_mag;
  logic               op_neg;
  coef_t              c;
  logic [P_BITS-1:0]  prod, prod_raw;
  logic signed [20:0] acc, acc_next;
  logic signed [11:0] res;

  assign {line, k, tap} = cnt;

  // Butterfly operands of the current product.
  always_comb begin
    if (state == S_COL) begin
      va = 13'(tbuf[{1'b0, tap} * 8 + line]);
      vb = 13'(tbuf[(3'd7 - {1'b0, tap}) * 8 + line]);
    end else begin
      va = 13'(signed'({5'b0, pix_mem[{line, 1'b0, tap}]})) - 13'sd128;
      vb = 13'(signed'({5'b0, pix_mem[{line, 3'd7 - {1'b0, tap}}]})) - 13'sd128;
    end
    sd     = k[0] ? va - vb : va + vb;
    op_neg = sd[12];
    sd_mag = op_neg ? 13'(-sd) : 13'(sd);
    if (state == S_COL)       op_mag = N_BITS'((sd_mag + 13'd8) >> 4);
    else if (sd_mag > 13'd255) op_mag = '1;
    else                      op_mag = N_BITS'(sd_mag);
    c = COEF[k][tap];
  end

  axm8x8 #(.APPROX_COLS(APPROX_COLS), .BIAS(BIAS)) u_mul (
    .a(op_mag), .b(c.mag), .raw_p(prod_raw), .p(prod));

  always_comb begin
    acc_next = (tap == 2'd0) ? '0 : acc;
    if (op_mag != '0) begin
      if (op_neg ^ c.neg) acc_next = acc_next - 21'(prod);
      else                acc_next = acc_next + 21'(prod);
    end
    res = 12'((acc_next + 21'sd64) >>> 7);
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_last  = out_valid && (idx == 6'd63);
  assign out_coef  = obuf[idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      idx   <= '0;
      cnt   <= '0;
      acc   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          pix_mem[idx] <= in_pixel;
          idx          <= idx + 6'd1;
          if (idx == 6'd63) state <= S_ROW;
        end
        S_ROW, S_COL: begin
          acc <= acc_next;
          cnt <= cnt + 8'd1;
          if (tap == 2'd3) begin
            if (state == S_ROW) tbuf[{line, k}] <= res;
            else                obuf[{k, line}] <= res;
          end
          if (cnt == 8'hFF) state <= (state == S_ROW) ? S_COL : S_OUT;
        end
        S_OUT: begin
          idx <= idx + 6'd1;
          if (idx == 6'd63) state <= S_LOAD;
        end
      endcase
    end
  end

  // The raw product is only needed for error analysis at the multiplier.
  logic unused_raw;
  assign unused_raw = ^prod_raw;

  // Column-pass operands always fit the multiplier without clamping.
  assert property (@(posedge clk) disable iff (!rst_n) state == S_COL |-> sd_mag < 13'd4072);
endmodule
