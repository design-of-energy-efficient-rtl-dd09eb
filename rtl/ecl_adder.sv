// ecl_adder: error correction logic, a constant-offset adder.
//
// Adds the constant BIAS to the raw product. Only the low ECL_BITS bits of
// the bias may be non-zero (0x0042 in ten bits by default), so the addition
// is a ripple-carry adder of ECL_BITS full-adder cells; the carry out of its
// top cell then increments the upper bits through a chain of half adders.
// The sum is taken modulo 2^WIDTH; for the 8x8 multiplier it cannot wrap,
// since 255 * 255 + 0x42 < 2^16. Combinational.
//
// The bias value, the ripple-carry form and the ten active bits follow the
// source. The increment of the upper bits is this design's choice: the
// source does not say what happens to the carry out of the ten-bit adder,
// and dropping it would corrupt large products.
module ecl_adder
  import axm_pkg::*;
#(
  parameter int unsigned       WIDTH = P_BITS,
  parameter int unsigned       BITS  = ECL_BITS,
  parameter logic [WIDTH-1:0]  BIAS  = ECL_BIAS
) (
  input  logic [WIDTH-1:0] raw,
  output logic [WIDTH-1:0] corrected
);
  logic [WIDTH:0] c;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i < BITS) begin : g_rca
      full_adder u_fa (.a(raw[i]), .b(BIAS[i]), .ci(c[i]), .s(corrected[i]), .co(c[i+1]));
    end else begin : g_inc
      half_adder u_ha (.a(raw[i]), .b(c[i]), .s(corrected[i]), .co(c[i+1]));
    end
  end

  // The sum is modulo 2^WIDTH: the last carry is dropped.
  logic unused_carry;
  assign unused_carry = c[WIDTH];

  if (BITS < WIDTH) begin : g_chk
    initial assert (BIAS >> BITS == '0)
      else $error("ecl_adder: BIAS has bits above the %0d-bit adder", BITS);
  end
endmodule
