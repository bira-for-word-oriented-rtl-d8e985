// Parallel counter: counts the ones in an N-bit vector.
//
// The must-repair analyzer uses it to count how many fault-list CAM entries
// match an incoming row (column) address. The count is formed by a balanced
// tree of adders: the N input bits are first paired into 2-bit sums, then the
// partial sums are added pairwise level by level, so the depth is
// ceil(log2 N) adder stages. Purely combinational.
//
// Interface: in[N-1:0] -> count, $clog2(N+1) bits wide.
// The document names a parallel counter for this job without describing it;
// the adder tree is this design's choice.
module parallel_counter #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]             in,
  output logic [$clog2(N+1)-1:0]   count
);

  localparam int unsigned CW     = $clog2(N+1);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned P      = 1 << LEVELS;  // leaves, padded to a power of two

  // tree[l][i] holds node i of level l; level 0 are the input bits.
  logic [CW-1:0] tree [LEVELS+1][P];

  always_comb begin
    for (int i = 0; i < P; i++)
      tree[0][i] = (i < N) ? CW'(in[i]) : '0;
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < P; i++)
        tree[l][i] = (i < (P >> l)) ? tree[l-1][2*i] + tree[l-1][2*i+1] : '0;
  end

  assign count = tree[LEVELS][0];

endmodule
