// Must-repair analyzer (MRA).
//
// Holds the fault-list (a row CAM and a column CAM of N_FL entries, N_FL =
// 2*R*C) and the solution record (a row CAM of R entries and a column CAM of
// C entries). The valid bits of the solution record are the L registers:
// they mark the spares in use and, being filled from the bottom, point at
// the next free entry. L_save keeps a copy taken when the BIST finishes.
//
// Test phase (final_phase low), one fault address per cycle, at speed:
//   - a fault whose row (column) is already in the solution record is
//     covered (r_covered / c_covered) and dropped; so is a repeat of a fault
//     already in the fault-list;
//   - the fault-list entries on the same row that are not yet covered are
//     counted with a parallel counter; if there are as many as spare columns
//     still free, the row is must-repair (r_mustrepair) and is written into
//     the solution record; columns likewise against the free spare rows. A
//     row and a column can both become must-repair on the same fault;
//   - f_force_row makes the row must-repair directly (a type-B word with
//     more than one failing bit);
//   - otherwise the fault is written into the fault-list;
//   - a must-repair with no spare left, or a full fault-list, sets
//     unrepairable, which lets the BIST stop early.
// A cover vector marks the fault-list entries whose row or column is in the
// solution record. It is updated by the same CAM search that checks the
// incoming fault, so no extra cycle is spent.
//
// Final phase (final_phase high), driven by the SOLVER:
//   - save (one cycle, when the BIST finishes) copies L and the cover vector
//     to L_save and fl_cov_save;
//   - cur_row/cur_col is the first fault-list entry, in list order, not
//     covered by the current solution; all_covered is high when none is left;
//   - r_insert (c_insert) writes cur_row (cur_col) into the next free row
//     (column) entry of the solution record and marks every fault-list entry
//     on that row (column) covered, in one cycle;
//   - restart returns the solution record and the cover vector to the saved
//     state for the next repair strategy.
// Skipping covered entries lets one repair strategy be judged in at most
// (free spares + 1) cycles.
//
// Reset asynchronous, active low; start (one cycle) empties all CAMs for a
// new test. The structure (fault-list, solution record, L and L_save
// registers, parallel counter, covered checks, RESTART) follows the
// document. The duplicate-fault filter, the cover vector, counting only
// uncovered entries and the skipping read order are this design's choices.
module bira_mra #(
  parameter int unsigned R     = 4,
  parameter int unsigned C     = 4,
  parameter int unsigned ROW_W = 10,
  parameter int unsigned COL_W = 8,
  parameter int unsigned N_FL  = 2 * R * C,
  localparam int unsigned RCW  = $clog2(R+1),
  localparam int unsigned CCW  = $clog2(C+1),
  localparam int unsigned FCW  = $clog2(N_FL+1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  // test phase: fault addresses from the BIST engine
  input  logic                        f_valid,
  input  logic [ROW_W-1:0]            f_row,
  input  logic [COL_W-1:0]            f_col,
  input  logic                        f_force_row,
  // final phase: from the SOLVER
  input  logic                        final_phase,
  input  logic                        save,
  input  logic                        restart,
  input  logic                        r_insert,
  input  logic                        c_insert,
  // status
  output logic                        r_covered,
  output logic                        c_covered,
  output logic                        r_mustrepair,
  output logic                        c_mustrepair,
  output logic                        fault_stored,
  output logic                        unrepairable,
  output logic                        all_covered,
  output logic [ROW_W-1:0]            cur_row,
  output logic [COL_W-1:0]            cur_col,
  output logic [RCW-1:0]              used_rows,
  output logic [CCW-1:0]              used_cols,
  output logic [FCW-1:0]              fl_count,
  // solution record
  output logic [R-1:0][ROW_W-1:0]     sol_rows,
  output logic [R-1:0]                sol_row_valid,
  output logic [C-1:0][COL_W-1:0]     sol_cols,
  output logic [C-1:0]                sol_col_valid
);

  localparam int unsigned FAW = (N_FL > 1) ? $clog2(N_FL) : 1;
  localparam int unsigned RAW = (R > 1) ? $clog2(R) : 1;
  localparam int unsigned CAW = (C > 1) ? $clog2(C) : 1;

  // ---------------- fault-list ----------------
  logic [N_FL-1:0]             fl_valid, fl_rmatch, fl_cmatch;
  logic [N_FL-1:0][ROW_W-1:0]  fl_rows;
  logic [N_FL-1:0][COL_W-1:0]  fl_cols;
  logic [ROW_W-1:0]            fl_rkey;
  logic [COL_W-1:0]            fl_ckey;
  logic                        fl_we;

  bira_cam #(.DEPTH(N_FL), .WIDTH(ROW_W)) u_fl_row (
    .clk, .rst_n, .clear(start), .restore(1'b0), .restore_valid('0),
    .we(fl_we), .waddr(FAW'(fl_count)), .wdata(f_row), .key(fl_rkey),
    .match(fl_rmatch), .valid(fl_valid), .words(fl_rows)
  );

  logic [N_FL-1:0] fl_valid_c;  // identical to fl_valid
  bira_cam #(.DEPTH(N_FL), .WIDTH(COL_W)) u_fl_col (
    .clk, .rst_n, .clear(start), .restore(1'b0), .restore_valid('0),
    .we(fl_we), .waddr(FAW'(fl_count)), .wdata(f_col), .key(fl_ckey),
    .match(fl_cmatch), .valid(fl_valid_c), .words(fl_cols)
  );

  parallel_counter #(.N(N_FL)) u_fl_count (.in(fl_valid), .count(fl_count));

  // ---------------- solution record ----------------
  logic [R-1:0] sr_rmatch, l_row_save;
  logic [C-1:0] sr_cmatch, l_col_save;
  logic         sr_rwe, sr_cwe;
  logic [ROW_W-1:0] sr_rdata;
  logic [COL_W-1:0] sr_cdata;

  bira_cam #(.DEPTH(R), .WIDTH(ROW_W)) u_sr_row (
    .clk, .rst_n, .clear(start), .restore(restart), .restore_valid(l_row_save),
    .we(sr_rwe), .waddr(RAW'(used_rows)), .wdata(sr_rdata), .key(f_row),
    .match(sr_rmatch), .valid(sol_row_valid), .words(sol_rows)
  );

  bira_cam #(.DEPTH(C), .WIDTH(COL_W)) u_sr_col (
    .clk, .rst_n, .clear(start), .restore(restart), .restore_valid(l_col_save),
    .we(sr_cwe), .waddr(CAW'(used_cols)), .wdata(sr_cdata), .key(f_col),
    .match(sr_cmatch), .valid(sol_col_valid), .words(sol_cols)
  );

  parallel_counter #(.N(R)) u_rows_used (.in(sol_row_valid), .count(used_rows));
  parallel_counter #(.N(C)) u_cols_used (.in(sol_col_valid), .count(used_cols));

  // ---------------- cover vector ----------------
  logic [N_FL-1:0] fl_cov, fl_cov_save;

  // ---------------- test phase ----------------
  logic [FCW-1:0] rcnt, ccnt;
  logic           dup, accept, row_full, col_full, fl_full, overflow;
  logic [CCW:0]   c_free;
  logic [RCW:0]   r_free;

  parallel_counter #(.N(N_FL)) u_rcnt (.in(fl_rmatch & ~fl_cov), .count(rcnt));
  parallel_counter #(.N(N_FL)) u_ccnt (.in(fl_cmatch & ~fl_cov), .count(ccnt));

  assign r_free   = (RCW+1)'(R) - (RCW+1)'(used_rows);
  assign c_free   = (CCW+1)'(C) - (CCW+1)'(used_cols);
  assign row_full = (used_rows == RCW'(R));
  assign col_full = (used_cols == CCW'(C));
  assign fl_full  = (fl_count == FCW'(N_FL));

  assign r_covered = |sr_rmatch;
  assign c_covered = |sr_cmatch && !f_force_row;
  assign dup       = |(fl_rmatch & fl_cmatch) && !f_force_row;
  assign accept    = f_valid && !final_phase && !unrepairable &&
                     !r_covered && !c_covered && !dup;

  assign r_mustrepair = accept && (f_force_row || 32'(rcnt) >= 32'(c_free));
  assign c_mustrepair = accept && !f_force_row && 32'(ccnt) >= 32'(r_free);
  assign fault_stored = accept && !r_mustrepair && !c_mustrepair;
  assign overflow     = (r_mustrepair && row_full) || (c_mustrepair && col_full) ||
                        (fault_stored && fl_full);
  assign fl_we        = fault_stored && !fl_full;

  // ---------------- final phase ----------------
  logic [N_FL-1:0] uncovered;
  logic [FAW-1:0]  first;

  assign uncovered   = fl_valid & ~fl_cov;
  assign all_covered = (uncovered == '0);

  always_comb begin
    first = '0;
    for (int i = N_FL - 1; i >= 0; i--)
      if (uncovered[i]) first = FAW'(i);
  end

  assign cur_row = fl_rows[first];
  assign cur_col = fl_cols[first];

  // CAM keys and solution record writes, shared by both phases
  assign fl_rkey  = final_phase ? cur_row : f_row;
  assign fl_ckey  = final_phase ? cur_col : f_col;
  assign sr_rdata = final_phase ? cur_row : f_row;
  assign sr_cdata = final_phase ? cur_col : f_col;
  assign sr_rwe   = final_phase ? (r_insert && !restart && !row_full)
                                : (r_mustrepair && !row_full);
  assign sr_cwe   = final_phase ? (c_insert && !restart && !col_full)
                                : (c_mustrepair && !col_full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl_cov        <= '0;
      fl_cov_save   <= '0;
      l_row_save   <= '0;
      l_col_save   <= '0;
      unrepairable <= 1'b0;
    end else if (start) begin
      fl_cov        <= '0;
      fl_cov_save   <= '0;
      l_row_save   <= '0;
      l_col_save   <= '0;
      unrepairable <= 1'b0;
    end else begin
      if (overflow) unrepairable <= 1'b1;
      if (save) begin
        fl_cov_save <= fl_cov;
        l_row_save <= sol_row_valid;
        l_col_save <= sol_col_valid;
      end
      if (restart)
        fl_cov <= fl_cov_save;
      else
        fl_cov <= fl_cov | (sr_rwe ? fl_rmatch : '0) | (sr_cwe ? fl_cmatch : '0);
    end
  end

  // The two fault-list CAMs are always written together.
  assert property (@(posedge clk) disable iff (!rst_n) fl_valid == fl_valid_c);
  // The SOLVER never inserts and restarts in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(restart && (r_insert || c_insert)));

endmodule
