// ks_adder: Kogge-Stone parallel-prefix adder, WIDTH bits (16 by default).
//
// Bit generate g = x & y and propagate p = x ^ y feed log2(WIDTH) prefix
// levels; level k combines each (G, P) pair with the pair 2^k positions to
// its right: G = G_hi | (P_hi & G_lo), P = P_hi & P_lo. After the last level
// G[i] is the carry out of bit i, and sum[i] = p[i] ^ carry into bit i.
// The carry out of the top bit is returned as cout. Combinational, depth
// log2(WIDTH) + 2 gate levels. The Kogge-Stone structure and the 16-bit
// width follow the source.
module ks_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = $clog2(WIDTH);

  logic [LEVELS:0][WIDTH-1:0]   g;
  logic [LEVELS-1:0][WIDTH-1:0] p;

  assign g[0] = x & y;
  assign p[0] = x ^ y;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= (1 << k)) begin : g_comb
        assign g[k+1][i] = g[k][i] | (p[k][i] & g[k][i-(1<<k)]);
        if (k + 1 < LEVELS) begin : g_p
          assign p[k+1][i] = p[k][i] & p[k][i-(1<<k)];
        end
      end else begin : g_pass
        assign g[k+1][i] = g[k][i];
        if (k + 1 < LEVELS) begin : g_p
          assign p[k+1][i] = p[k][i];
        end
      end
    end
  end

  assign sum  = p[0] ^ {g[LEVELS][WIDTH-2:0], 1'b0};
  assign cout = g[LEVELS][WIDTH-1];
endmodule
