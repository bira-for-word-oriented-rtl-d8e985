// k-subset enumerator: next constant-weight vector in one combinational step.
//
// A repair strategy is an N-bit word (N = R + C spare elements) whose bit j
// tells which kind of spare repairs the j-th fault left uncovered during the
// final analysis: 1 = spare row ("r"), 0 = spare column ("c"). Only the low
// LEN bits are used and exactly k of them are 1, where LEN and k are the
// spare columns plus spare rows (resp. spare rows) still free after the
// must-repair analysis. This block maps a strategy to the next one of the
// same weight in increasing binary order, so starting at the k low ones it
// visits all C(LEN, k) strategies.
//
// How: let x be the current vector and p the position of its lowest 1.
//   1. y = lowest one of x, from a prefix OR (parallel prefix network).
//   2. s = x + y, carries from a parallel prefix network. The addition
//      clears the lowest run of ones and sets the bit just above it.
//   3. The run that was cleared, x & ~s, shifted right by p + 1 bits
//      (a log2(N)-stage shifter driven by the binary index of y) gives the
//      remaining ones of the run packed at the bottom.
//   next = s | that packed run.
// last is high when x is the final vector: x has no 1 (k = 0), or the next
// vector would use a bit at or above LEN.
//
// Interface: cur, len -> next, last. Purely combinational.
// The document gives the function (an enumerator of constant-weight vectors
// built from a parallel prefix algorithm, Kogge-Stone style, 8 bits for four
// spare rows and four spare columns); the formulation above is this design's.
module ksubset_enum #(
  parameter int unsigned N     = 8,
  parameter int unsigned STYLE = 0,      // 0 Kogge-Stone, 1 serial prefix
  localparam int unsigned LW   = $clog2(N+1),
  localparam int unsigned SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  cur,
  input  logic [LW-1:0] len,
  output logic [N-1:0]  next,
  output logic          last
);

  logic [N-2:0] pre_or;   // OR of bits i..0; the top bit's OR is never needed
  logic [N-1:0] lowest, carry_g, sum, run, packed_run, len_mask;
  logic [N:0]   carry;
  logic [SW-1:0] pos;

  // Step 1: prefix OR; lowest one = bit set with nothing set below it.
  ks_prefix #(.N(N-1), .STYLE(STYLE)) u_prefix_or (
    .g(cur[N-2:0]), .p({(N-1){1'b1}}), .gout(pre_or)
  );
  assign lowest = cur & ~{pre_or, 1'b0};

  // Step 2: s = cur + lowest with prefix-computed carries.
  ks_prefix #(.N(N), .STYLE(STYLE)) u_prefix_carry (
    .g(cur & lowest), .p(cur ^ lowest), .gout(carry_g)
  );
  assign carry = {carry_g, 1'b0};
  assign sum   = (cur ^ lowest) ^ carry[N-1:0];

  // Step 3: binary index of the lowest one, then shift the cleared run.
  always_comb begin
    pos = '0;
    for (int i = 0; i < N; i++)
      if (lowest[i]) pos |= SW'(i);
  end

  assign run = cur & ~sum;

  always_comb begin
    logic [N-1:0] t;
    t = run >> 1;
    for (int b = 0; b < SW; b++)
      if (pos[b]) t = t >> (1 << b);
    packed_run = t;
  end

  assign next = sum | packed_run;

  always_comb
    for (int i = 0; i < N; i++)
      len_mask[i] = (i < int'(len));

  assign last = (cur == '0) || carry[N] || ((next & ~len_mask) != '0);

endmodule
