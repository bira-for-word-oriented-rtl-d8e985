// Built-in repair analyzer (BIRA) with optimal repair rate, single test.
//
// Finds, for a memory array with R spare rows and C spare columns, a repair
// solution using the fewest spare elements, while the array is tested only
// once. Blocks:
//   word_fault_adapter : BIST triplet (row, column, syndrome) -> fault address
//                        (bit-oriented, type A or type B word-oriented memory)
//   bira_mra           : must-repair analysis on the fly during the test,
//                        fault-list and solution record CAMs
//   bira_mra_c         : replaces adapter and MRA for type C memories; keeps
//                        extended fault addresses (row, column, bit mask)
//   bira_solver        : after the test, enumerates repair strategies with a
//                        k-subset enumerator and keeps the cheapest that works
// MEM_TYPE selects the memory kind (bira_pkg::mem_type_e).
//
// Interface
//   start      one-cycle pulse before a test: empties the analyzer
//   bist_*     one triplet per cycle while bist_valid is high
//   bist_done  one-cycle pulse after the last triplet: the final analysis runs
//   early_unrepairable  high as soon as the array is known to be
//              unrepairable during the test (the BIST may stop)
//   done / repairable   result; when repairable, rep_rows/rep_row_valid and
//              rep_cols/rep_col_valid list the spares to program and
//              rep_cost their number. For types B and C, a column entry is
//              the virtual column {column address, bit index}.
// Timing: faults are taken at full speed, one per cycle. From the clock edge
// that samples bist_done to the one that raises done, the final analysis
// takes at most 1 + C(L, Rf) * (L + 1) + (L + 1) cycles, Rf and L the spare
// rows and all spares left free by the must-repair analysis: 640 cycles for
// four spare rows and four spare columns without must-repairs.
//
// Defaults: four spare rows and four spare columns as in the document's
// implementation, a bit-oriented array. Address widths and word width are
// not given by the document and are chosen here.
module bira_top
  import bira_pkg::*;
#(
  parameter int unsigned R        = 4,
  parameter int unsigned C        = 4,
  parameter int unsigned ROW_W    = 10,
  parameter int unsigned COL_W    = 8,
  parameter int unsigned W        = 8,
  parameter mem_type_e   MEM_TYPE = MEM_BIT,
  parameter int unsigned STYLE    = 0,
  localparam int unsigned BW      = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned VCOL_W  = (MEM_TYPE == MEM_TYPE_B || MEM_TYPE == MEM_TYPE_C)
                                    ? COL_W + BW : COL_W,
  localparam int unsigned KW      = $clog2(R + C + 2)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     bist_valid,
  input  logic [ROW_W-1:0]         bist_row,
  input  logic [COL_W-1:0]         bist_col,
  input  logic [W-1:0]             bist_syn,
  input  logic                     bist_done,
  output logic                     early_unrepairable,
  output logic                     done,
  output logic                     repairable,
  output logic [R-1:0][ROW_W-1:0]  rep_rows,
  output logic [R-1:0]             rep_row_valid,
  output logic [C-1:0][VCOL_W-1:0] rep_cols,
  output logic [C-1:0]             rep_col_valid,
  output logic [KW-1:0]            rep_cost
);

  localparam int unsigned RCW = $clog2(R + 1);
  localparam int unsigned CCW = $clog2(C + 1);

  logic final_phase, save, restart, r_insert, c_insert, all_covered;
  logic [RCW-1:0] used_rows;
  logic [CCW-1:0] used_cols;

  if (MEM_TYPE == MEM_TYPE_C) begin : g_type_c
    // type C: the triplet goes straight to the extended-address analyzer
    bira_mra_c #(.R(R), .C(C), .ROW_W(ROW_W), .COL_W(COL_W), .W(W)) u_mra (
      .clk, .rst_n, .start,
      .f_valid(bist_valid), .f_row(bist_row), .f_col(bist_col), .f_syn(bist_syn),
      .final_phase, .save, .restart, .r_insert, .c_insert,
      .r_covered(), .c_covered(), .r_mustrepair(), .c_mustrepair(),
      .fault_stored(), .fault_merged(),
      .unrepairable(early_unrepairable), .all_covered,
      .cur_row(), .cur_col(), .cur_bit(), .used_rows, .used_cols, .fl_count(),
      .sol_rows(rep_rows), .sol_row_valid(rep_row_valid),
      .sol_cols(rep_cols), .sol_col_valid(rep_col_valid)
    );
  end else begin : g_type_abit
    logic              f_valid, f_force_row;
    logic [ROW_W-1:0]  f_row;
    logic [VCOL_W-1:0] f_col;

    word_fault_adapter #(
      .MEM_TYPE(MEM_TYPE), .ROW_W(ROW_W), .COL_W(COL_W), .W(W)
    ) u_adapter (
      .t_valid(bist_valid), .t_row(bist_row), .t_col(bist_col), .t_syn(bist_syn),
      .f_valid, .f_row, .f_col, .f_force_row
    );

    bira_mra #(.R(R), .C(C), .ROW_W(ROW_W), .COL_W(VCOL_W)) u_mra (
      .clk, .rst_n, .start,
      .f_valid, .f_row, .f_col, .f_force_row,
      .final_phase, .save, .restart, .r_insert, .c_insert,
      .r_covered(), .c_covered(), .r_mustrepair(), .c_mustrepair(), .fault_stored(),
      .unrepairable(early_unrepairable), .all_covered,
      .cur_row(), .cur_col(), .used_rows, .used_cols, .fl_count(),
      .sol_rows(rep_rows), .sol_row_valid(rep_row_valid),
      .sol_cols(rep_cols), .sol_col_valid(rep_col_valid)
    );
  end

  bira_solver #(.R(R), .C(C), .STYLE(STYLE)) u_solver (
    .clk, .rst_n, .start, .bist_done,
    .unrepairable(early_unrepairable), .all_covered, .used_rows, .used_cols,
    .final_phase, .save, .restart, .r_insert, .c_insert,
    .done, .repairable, .strategy(), .strategy_opt(), .cost_opt(rep_cost),
    .better(), .ev_success(), .ev_prune(), .ev_exhaust()
  );

endmodule
