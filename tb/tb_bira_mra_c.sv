// Directed self-checking testbench of bira_mra_c (four spare rows, four
// spare columns, 8-bit words). It checks: a failing word stored as one
// extended fault address; a second failure of the same word merged into it;
// a row made must-repair by counting failing bits; faults on that row
// dropped; two virtual columns of one column address made must-repair in
// the same cycle; a fault on a repaired virtual column dropped; and the
// final-phase protocol (first uncovered entry and its lowest uncovered bit,
// a column insert of that virtual column, restart to the saved state).
module tb_bira_mra_c;
  logic clk = 0, rst_n = 0, start = 0;
  logic f_valid = 0;
  logic [9:0] f_row = '0;
  logic [7:0] f_col = '0;
  logic [7:0] f_syn = '0;
  logic final_phase = 0, save = 0, restart = 0, r_insert = 0, c_insert = 0;
  logic r_covered, c_covered, r_mustrepair, c_mustrepair, fault_stored, fault_merged;
  logic unrepairable, all_covered;
  logic [9:0] cur_row;
  logic [7:0] cur_col;
  logic [2:0] cur_bit;
  logic [2:0] used_rows, used_cols;
  logic [5:0] fl_count;
  logic [3:0][9:0] sol_rows;
  logic [3:0] sol_row_valid, sol_col_valid;
  logic [3:0][10:0] sol_cols;
  int checks = 0, failures = 0;

  bira_mra_c #(.R(4), .C(4), .ROW_W(10), .COL_W(8), .W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Present one triplet for one cycle; check the combinational decision.
  task automatic triplet(int r, int c, int s, int exp_stored, int exp_merged, int exp_rmr, int exp_cmr);
    @(negedge clk);
    f_valid = 1; f_row = 10'(r); f_col = 8'(c); f_syn = 8'(s);
    #1;
    expect_eq($sformatf("stored (%0d,%0d,%b)", r, c, f_syn), int'(fault_stored), exp_stored);
    expect_eq($sformatf("merged (%0d,%0d,%b)", r, c, f_syn), int'(fault_merged), exp_merged);
    expect_eq($sformatf("row must-repair (%0d,%0d,%b)", r, c, f_syn), int'(r_mustrepair), exp_rmr);
    expect_eq($sformatf("col must-repair (%0d,%0d,%b)", r, c, f_syn), int'(c_mustrepair), exp_cmr);
    @(posedge clk);
    #1;
    f_valid = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    triplet(5, 3, 'b0000_0011, 1, 0, 0, 0);       // one entry, two failing bits
    triplet(5, 3, 'b0000_0100, 0, 1, 0, 0);       // same word: merged
    expect_eq("one entry", int'(fl_count), 1);
    // row 5 now has 3 failing bits; 3 + 2 new > 4 free spare columns
    triplet(5, 9, 'b0000_0011, 0, 0, 1, 0);
    expect_eq("row spare used", int'(used_rows), 1);
    expect_eq("row 5 repaired", int'(sol_rows[0]), 5);
    @(negedge clk); f_valid = 1; f_row = 5; f_col = 77; f_syn = 8'h80; #1;
    expect_eq("r_covered", int'(r_covered), 1);
    expect_eq("covered not stored", int'(fault_stored || fault_merged), 0);
    @(negedge clk); f_valid = 0;
    // column address 20, bits 0 and 1: three faults each, three free spare rows
    for (int r = 10; r <= 12; r++) triplet(r, 20, 'b11, 1, 0, 0, 0);
    triplet(13, 20, 'b11, 0, 0, 0, 1);
    expect_eq("two column spares in one cycle", int'(used_cols), 2);
    expect_eq("virtual column {20,0}", int'(sol_cols[0]), 20 * 8 + 0);
    expect_eq("virtual column {20,1}", int'(sol_cols[1]), 20 * 8 + 1);
    @(negedge clk); f_valid = 1; f_row = 14; f_col = 20; f_syn = 8'b01; #1;
    expect_eq("c_covered", int'(c_covered), 1);
    @(negedge clk); f_valid = 0;
    // bit 2 of column 20 is not repaired: stored
    triplet(15, 20, 'b101, 1, 0, 0, 0);
    triplet(30, 40, 'b1000, 1, 0, 0, 0);

    // final phase
    @(negedge clk); final_phase = 1; save = 1;
    @(negedge clk); save = 0; #1;
    expect_eq("not all covered", int'(all_covered), 0);
    expect_eq("cur_row", int'(cur_row), 15);
    expect_eq("cur_col", int'(cur_col), 20);
    expect_eq("cur_bit", int'(cur_bit), 2);
    c_insert = 1;
    @(negedge clk); c_insert = 0; #1;
    expect_eq("column {20,2} inserted", int'(sol_cols[2]), 20 * 8 + 2);
    expect_eq("next cur_row", int'(cur_row), 30);
    expect_eq("next cur_bit", int'(cur_bit), 3);
    r_insert = 1;
    @(negedge clk); r_insert = 0; #1;
    expect_eq("all covered", int'(all_covered), 1);
    expect_eq("rows used", int'(used_rows), 2);
    restart = 1;
    @(negedge clk); restart = 0; #1;
    expect_eq("restart rows", int'(used_rows), 1);
    expect_eq("restart cols", int'(used_cols), 2);
    expect_eq("restart cur_row", int'(cur_row), 15);
    expect_eq("restart cur_bit", int'(cur_bit), 2);
    expect_eq("no overflow", int'(unrepairable), 0);
    final_phase = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
