// Parallel prefix network over (generate, propagate) pairs.
//
// Computes, for every bit i, the group generate G[i] of bits i..0 under the
// usual carry operator (g_hi, p_hi) o (g_lo, p_lo) = (g_hi | p_hi & g_lo,
// p_hi & p_lo). With p = all ones it is a prefix OR; with g = a & b and
// p = a ^ b it yields the carries of a + b (carry into bit i+1 = G[i]).
//
// STYLE selects the prefix structure:
//   0 : Kogge-Stone, ceil(log2 N) levels, one operator per bit and level
//       (the configuration named for the enumerator of the analyzer)
//   1 : serial (ripple) chain, N-1 levels, fewest operators
// Both give identical results; they trade area against delay. Purely
// combinational.
module ks_prefix #(
  parameter int unsigned N     = 8,
  parameter int unsigned STYLE = 0
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gout
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  if (STYLE == 0) begin : g_kogge_stone
    logic [N-1:0] gl [LEVELS+1];
    logic [N-1:0] pl [LEVELS+1];
    assign gl[0] = g;
    assign pl[0] = p;
    for (genvar l = 0; l < LEVELS; l++) begin : g_level
      localparam int unsigned D = 1 << l;
      for (genvar i = 0; i < N; i++) begin : g_bit
        if (i >= D) begin : g_op
          assign gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i-D]);
          assign pl[l+1][i] = pl[l][i] & pl[l][i-D];
        end else begin : g_pass
          assign gl[l+1][i] = gl[l][i];
          assign pl[l+1][i] = pl[l][i];
        end
      end
    end
    assign gout = gl[LEVELS];
  end else begin : g_serial
    always_comb begin
      gout[0] = g[0];
      for (int i = 1; i < N; i++)
        gout[i] = g[i] | (p[i] & gout[i-1]);
    end
  end

endmodule
