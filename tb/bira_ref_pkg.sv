// Reference model for the analyzer testbenches: the fewest spare elements
// that repair a fault map, found by brute force. Every subset of the faulty
// rows with at most R members (forced rows always included) is tried as the
// set of spare rows; the faults outside those rows need one spare column per
// distinct column address. Fault maps must have at most 16 distinct rows.
package bira_ref_pkg;

  typedef struct {
    int row;
    int col;
    bit force_row;   // type-B word with several failing bits
  } fault_t;

  // Returns the minimal number of spares, or -1 if no repair exists.
  function automatic int min_repair_cost(fault_t f[$], int R, int C);
    int rows[$];
    int best, forced_mask;
    best = -1;
    forced_mask = 0;
    rows.delete();
    foreach (f[i]) begin
      int idx[$];
      idx = rows.find_first_index(x) with (x == f[i].row);
      if (idx.size() == 0) rows.push_back(f[i].row);
    end
    foreach (f[i]) if (f[i].force_row)
      foreach (rows[j]) if (rows[j] == f[i].row) forced_mask |= (1 << j);
    for (int m = 0; m < (1 << rows.size()); m++) begin
      int nr;
      int cols[$];
      nr = $countones(m);
      cols.delete();
      if (nr > R || (m & forced_mask) != forced_mask) continue;
      foreach (f[i]) begin
        bit in_rows;
        in_rows = 0;
        foreach (rows[j]) if (rows[j] == f[i].row && m[j]) in_rows = 1;
        if (!in_rows) begin
          int idx[$];
          idx = cols.find_first_index(x) with (x == f[i].col);
          if (idx.size() == 0) cols.push_back(f[i].col);
        end
      end
      if (cols.size() <= C && (best < 0 || nr + cols.size() < best))
        best = nr + cols.size();
    end
    return best;
  endfunction

  function automatic longint binom(int n, int k);
    longint r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

endpackage
