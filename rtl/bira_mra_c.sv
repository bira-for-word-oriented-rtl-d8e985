// Must-repair analyzer for word-oriented memories of type C.
//
// In a type-C memory any faulty column, in any bit position of a word, can
// be replaced by any of the C spare columns. A spare column therefore
// replaces one virtual column {column address, bit index}, and one failing
// word can hold several faults at once. To take one BIST triplet (row R,
// column address CA, syndrome S) per cycle, the fault-list keeps extended
// fault addresses: row, column address and a W-bit mask of failing bits.
// Faults of the same word are merged into one entry. A cover state per entry
// (row covered, and one covered flag per bit) records which faults the
// current solution already repairs.
//
// Test phase (final_phase low), per triplet:
//   - bits of S whose virtual column is in the solution record, or all of S
//     if the row is, are covered and dropped (c_covered / r_covered);
//   - row must-repair: the uncovered failing bits of the row in the
//     fault-list plus the new ones outnumber the free spare columns;
//   - column must-repair, for each new bit b: the fault-list holds as many
//     uncovered faults in virtual column {CA, b} as there are free spare
//     rows. Several columns (and the row) can be written in the same cycle;
//   - remaining new bits are merged into the entry of the same word, or
//     written as a new entry; overflow or a must-repair without a free spare
//     sets unrepairable.
// Final phase: same protocol as bira_mra. cur_row/cur_col/cur_bit is the
// first entry with an uncovered bit and its lowest uncovered bit; r_insert
// repairs the row, c_insert the virtual column {cur_col, cur_bit}; both mark
// every affected fault of the fault-list covered in the same cycle.
//
// Reset asynchronous, active low; start clears the analyzer. The document
// defines the extended column and fault addresses, says that faults within
// a word are combined into one extended fault address and that triplets
// must be taken at speed; the counting rules and the merge logic here are
// this design's own formulation of that, using the same must-repair
// conditions as the bit-oriented analyzer on virtual columns.
module bira_mra_c #(
  parameter int unsigned R      = 4,
  parameter int unsigned C      = 4,
  parameter int unsigned ROW_W  = 10,
  parameter int unsigned COL_W  = 8,
  parameter int unsigned W      = 8,
  parameter int unsigned N_FL   = 2 * R * C,
  localparam int unsigned BW    = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned VCOL_W = COL_W + BW,
  localparam int unsigned RCW   = $clog2(R+1),
  localparam int unsigned CCW   = $clog2(C+1),
  localparam int unsigned FCW   = $clog2(N_FL+1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        f_valid,
  input  logic [ROW_W-1:0]            f_row,
  input  logic [COL_W-1:0]            f_col,
  input  logic [W-1:0]                f_syn,
  input  logic                        final_phase,
  input  logic                        save,
  input  logic                        restart,
  input  logic                        r_insert,
  input  logic                        c_insert,
  output logic                        r_covered,
  output logic                        c_covered,
  output logic                        r_mustrepair,
  output logic                        c_mustrepair,
  output logic                        fault_stored,
  output logic                        fault_merged,
  output logic                        unrepairable,
  output logic                        all_covered,
  output logic [ROW_W-1:0]            cur_row,
  output logic [COL_W-1:0]            cur_col,
  output logic [BW-1:0]               cur_bit,
  output logic [RCW-1:0]              used_rows,
  output logic [CCW-1:0]              used_cols,
  output logic [FCW-1:0]              fl_count,
  output logic [R-1:0][ROW_W-1:0]     sol_rows,
  output logic [R-1:0]                sol_row_valid,
  output logic [C-1:0][VCOL_W-1:0]    sol_cols,
  output logic [C-1:0]                sol_col_valid
);

  localparam int unsigned FAW = (N_FL > 1) ? $clog2(N_FL) : 1;
  localparam int unsigned RAW = (R > 1) ? $clog2(R) : 1;
  localparam int unsigned SUMW = $clog2(N_FL * W + W + 1);

  // ---------------- fault-list: row CAM, column CAM, bit masks ----------------
  logic [N_FL-1:0]             fl_valid, fl_valid_c, fl_rmatch, fl_cmatch;
  logic [N_FL-1:0][ROW_W-1:0]  fl_rows;
  logic [N_FL-1:0][COL_W-1:0]  fl_cols;
  logic [W-1:0]                fl_mask [N_FL];
  logic [ROW_W-1:0]            fl_rkey;
  logic [COL_W-1:0]            fl_ckey;
  logic                        new_entry;

  bira_cam #(.DEPTH(N_FL), .WIDTH(ROW_W)) u_fl_row (
    .clk, .rst_n, .clear(start), .restore(1'b0), .restore_valid('0),
    .we(new_entry), .waddr(FAW'(fl_count)), .wdata(f_row), .key(fl_rkey),
    .match(fl_rmatch), .valid(fl_valid), .words(fl_rows)
  );
  bira_cam #(.DEPTH(N_FL), .WIDTH(COL_W)) u_fl_col (
    .clk, .rst_n, .clear(start), .restore(1'b0), .restore_valid('0),
    .we(new_entry), .waddr(FAW'(fl_count)), .wdata(f_col), .key(fl_ckey),
    .match(fl_cmatch), .valid(fl_valid_c), .words(fl_cols)
  );
  parallel_counter #(.N(N_FL)) u_fl_count (.in(fl_valid), .count(fl_count));

  // ---------------- solution record ----------------
  logic [R-1:0] sr_rmatch, l_row_save;
  logic [C-1:0] l_col_save;
  logic         sr_rwe;
  logic [ROW_W-1:0] sr_rdata;
  logic [C-1:0][VCOL_W-1:0] sr_cnext;   // next contents of the column record
  logic [C-1:0]             sr_cvnext;

  bira_cam #(.DEPTH(R), .WIDTH(ROW_W)) u_sr_row (
    .clk, .rst_n, .clear(start), .restore(restart), .restore_valid(l_row_save),
    .we(sr_rwe), .waddr(RAW'(used_rows)), .wdata(sr_rdata), .key(f_row),
    .match(sr_rmatch), .valid(sol_row_valid), .words(sol_rows)
  );
  parallel_counter #(.N(R)) u_rows_used (.in(sol_row_valid), .count(used_rows));
  parallel_counter #(.N(C)) u_cols_used (.in(sol_col_valid), .count(used_cols));

  // ---------------- cover state ----------------
  logic [N_FL-1:0] rcov, rcov_save;
  logic [W-1:0]    bcov [N_FL];
  logic [W-1:0]    bcov_save [N_FL];

  // ---------------- test phase ----------------
  logic [W-1:0]    scov, new_bits, old_bits, fresh, col_mr, rem;
  logic [N_FL-1:0] same_word;
  logic [FAW-1:0]  word_idx;
  logic            has_word;
  logic [SUMW-1:0] row_bits;
  logic [CCW:0]    c_free;
  logic [RCW:0]    r_free;
  logic [CCW:0]    n_col_mr;
  logic            active, row_mr_c, overflow;

  assign active = f_valid && !final_phase && !unrepairable && (f_syn != '0);
  assign r_free = (RCW+1)'(R) - (RCW+1)'(used_rows);
  assign c_free = (CCW+1)'(C) - (CCW+1)'(used_cols);

  always_comb begin
    // bits whose virtual column is already a spare
    scov = '0;
    for (int j = 0; j < C; j++)
      if (sol_col_valid[j] && sol_cols[j][VCOL_W-1:BW] == f_col)
        scov[sol_cols[j][BW-1:0]] = 1'b1;
    // the entry holding the same word, if any
    same_word = fl_rmatch & fl_cmatch;
    has_word  = (same_word != '0);
    word_idx  = '0;
    old_bits  = '0;
    for (int e = 0; e < N_FL; e++)
      if (same_word[e]) begin
        word_idx = FAW'(e);
        old_bits = fl_mask[e];
      end
    new_bits = f_syn & ~scov;
    fresh    = new_bits & ~old_bits;
    // uncovered failing bits already stored on this row
    row_bits = '0;
    for (int e = 0; e < N_FL; e++)
      if (fl_rmatch[e] && !rcov[e])
        for (int b = 0; b < W; b++)
          row_bits += SUMW'(fl_mask[e][b] && !bcov[e][b]);
    for (int b = 0; b < W; b++)
      row_bits += SUMW'(fresh[b]);
    // per new bit: uncovered faults stored in the same virtual column
    col_mr = '0;
    for (int b = 0; b < W; b++) begin
      int cnt;
      cnt = 0;
      for (int e = 0; e < N_FL; e++)
        cnt += int'(fl_cmatch[e] && !rcov[e] && fl_mask[e][b] && !bcov[e][b]);
      if (fresh[b] && cnt >= int'(r_free)) col_mr[b] = 1'b1;
    end
    n_col_mr = '0;
    for (int b = 0; b < W; b++)
      n_col_mr += (CCW+1)'(col_mr[b]);
  end

  assign r_covered    = f_valid && !final_phase && |sr_rmatch;
  assign c_covered    = f_valid && !final_phase && !(|sr_rmatch) && (f_syn & ~scov) == '0;
  assign row_mr_c     = active && !(|sr_rmatch) && (fresh != '0) &&
                        32'(row_bits) > 32'(c_free);
  assign r_mustrepair = row_mr_c;
  assign c_mustrepair = active && !(|sr_rmatch) && (col_mr != '0);
  assign rem          = (active && !(|sr_rmatch) && !row_mr_c) ? (fresh & ~col_mr) : '0;
  assign fault_merged = (rem != '0) && has_word;
  assign fault_stored = (rem != '0) && !has_word;
  assign overflow     = (row_mr_c && used_rows == RCW'(R)) ||
                        (c_mustrepair && 32'(n_col_mr) > 32'(c_free)) ||
                        (fault_stored && fl_count == FCW'(N_FL));
  assign new_entry    = fault_stored && fl_count != FCW'(N_FL);

  // ---------------- final phase ----------------
  logic [N_FL-1:0] uncovered;
  logic [FAW-1:0]  first;
  logic [W-1:0]    first_bits;

  always_comb
    for (int e = 0; e < N_FL; e++)
      uncovered[e] = fl_valid[e] && !rcov[e] && ((fl_mask[e] & ~bcov[e]) != '0);

  assign all_covered = (uncovered == '0);

  always_comb begin
    first = '0;
    for (int e = N_FL - 1; e >= 0; e--)
      if (uncovered[e]) first = FAW'(e);
    first_bits = fl_mask[first] & ~bcov[first];
    cur_bit = '0;
    for (int b = W - 1; b >= 0; b--)
      if (first_bits[b]) cur_bit = BW'(b);
  end

  assign cur_row  = fl_rows[first];
  assign cur_col  = fl_cols[first];
  assign fl_rkey  = final_phase ? cur_row : f_row;
  assign fl_ckey  = final_phase ? cur_col : f_col;
  assign sr_rdata = final_phase ? cur_row : f_row;
  assign sr_rwe   = final_phase ? (r_insert && !restart && used_rows != RCW'(R))
                                : (row_mr_c && used_rows != RCW'(R));

  // bits newly repaired by spare columns this cycle, for fault-list column matches
  logic [W-1:0] col_cover_bits;
  assign col_cover_bits = final_phase ? ((c_insert && !restart && used_cols != CCW'(C))
                                         ? (W'(1) << cur_bit) : '0)
                                      : (overflow ? '0 : col_mr);

  // next contents of the column record: append the new virtual columns
  always_comb begin
    int slot;
    sr_cnext  = sol_cols;
    sr_cvnext = sol_col_valid;
    slot      = int'(used_cols);
    for (int b = 0; b < W; b++)
      if (col_cover_bits[b] && slot < int'(C)) begin
        sr_cnext[slot]  = {final_phase ? cur_col : f_col, BW'(b)};
        sr_cvnext[slot] = 1'b1;
        slot++;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sol_cols      <= '0;
      sol_col_valid <= '0;
      l_col_save    <= '0;
    end else if (start) begin
      sol_col_valid <= '0;
      l_col_save    <= '0;
    end else if (restart) begin
      sol_col_valid <= l_col_save;
    end else begin
      sol_cols      <= sr_cnext;
      sol_col_valid <= sr_cvnext;
      if (save) l_col_save <= sol_col_valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcov         <= '0;
      rcov_save    <= '0;
      l_row_save   <= '0;
      unrepairable <= 1'b0;
      for (int e = 0; e < N_FL; e++) begin
        fl_mask[e]   <= '0;
        bcov[e]      <= '0;
        bcov_save[e] <= '0;
      end
    end else if (start) begin
      rcov         <= '0;
      rcov_save    <= '0;
      l_row_save   <= '0;
      unrepairable <= 1'b0;
      for (int e = 0; e < N_FL; e++) begin
        bcov[e]      <= '0;
        bcov_save[e] <= '0;
      end
    end else begin
      if (overflow) unrepairable <= 1'b1;
      if (save) begin
        rcov_save  <= rcov;
        l_row_save <= sol_row_valid;
        for (int e = 0; e < N_FL; e++) bcov_save[e] <= bcov[e];
      end
      if (restart) begin
        rcov <= rcov_save;
        for (int e = 0; e < N_FL; e++) bcov[e] <= bcov_save[e];
      end else begin
        rcov <= rcov | (sr_rwe ? fl_rmatch : '0);
        for (int e = 0; e < N_FL; e++)
          if (fl_cmatch[e]) bcov[e] <= bcov[e] | col_cover_bits;
      end
      if (new_entry) fl_mask[FAW'(fl_count)] <= rem;
      else if (fault_merged) fl_mask[word_idx] <= old_bits | rem;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) fl_valid == fl_valid_c);
  assert property (@(posedge clk) disable iff (!rst_n) !(restart && (r_insert || c_insert)));

endmodule
