// kogge_stone_adder -- W-bit Kogge-Stone parallel-prefix adder.
//
// Bit generate g = a & b and propagate p = a ^ b are combined in ceil(log2 W)
// prefix levels; at level l every position i >= 2^l merges the (G, P) pair of
// position i - 2^l: G = G_i | P_i & G_(i-2^l), P = P_i & P_(i-2^l). After the
// last level G_i is the carry out of bit i, and sum_i = p_i ^ G_(i-1).
// Interface: a, b in; sum (W bits) out, modulo 2^W. No carry-in or carry-out:
// callers size W so that the sum cannot overflow. Purely
// combinational.
module kogge_stone_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  localparam int L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [L+1];
  logic [W-1:0] p [L+1];

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_merge
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign sum = p[0] ^ {g[L][W-2:0], 1'b0};
endmodule
