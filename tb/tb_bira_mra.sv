// Self-checking testbench of bira_mra (four spare rows, four spare columns,
// fault-list of 32 entries). Directed sequences check: faults stored in the
// fault-list; a row that collects more faults than free spare columns
// becoming must-repair; faults on a repaired row being dropped; repeated
// faults being dropped; a column must-repair against the free spare rows; a
// row and a column becoming must-repair on the same fault; a forced row;
// fault-list overflow and must-repair without spares setting unrepairable;
// and the final-phase protocol (save, first uncovered fault, row and column
// inserts, restart back to the saved state).
module tb_bira_mra;
  logic clk = 0, rst_n = 0, start = 0;
  logic f_valid = 0, f_force_row = 0;
  logic [9:0] f_row = '0;
  logic [7:0] f_col = '0;
  logic final_phase = 0, save = 0, restart = 0, r_insert = 0, c_insert = 0;
  logic r_covered, c_covered, r_mustrepair, c_mustrepair, fault_stored;
  logic unrepairable, all_covered;
  logic [9:0] cur_row;
  logic [7:0] cur_col;
  logic [2:0] used_rows, used_cols;
  logic [5:0] fl_count;
  logic [3:0][9:0] sol_rows;
  logic [3:0] sol_row_valid, sol_col_valid;
  logic [3:0][7:0] sol_cols;
  int checks = 0, failures = 0;

  bira_mra #(.R(4), .C(4), .ROW_W(10), .COL_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Present one fault for one cycle; check the combinational decision.
  task automatic fault(int r, int c, int exp_stored, int exp_rmr, int exp_cmr, bit force_row = 0);
    @(negedge clk);
    f_valid = 1; f_row = 10'(r); f_col = 8'(c); f_force_row = force_row;
    #1;
    expect_eq($sformatf("stored (%0d,%0d)", r, c), int'(fault_stored), exp_stored);
    expect_eq($sformatf("row must-repair (%0d,%0d)", r, c), int'(r_mustrepair), exp_rmr);
    expect_eq($sformatf("col must-repair (%0d,%0d)", r, c), int'(c_mustrepair), exp_cmr);
    @(posedge clk);
    #1;
    f_valid = 0; f_force_row = 0;
  endtask

  task automatic pulse_start();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    pulse_start();
    // row 5 collects four faults (= four free spare columns), the fifth makes it must-repair
    for (int c = 1; c <= 4; c++) fault(5, c, 1, 0, 0);
    expect_eq("fl_count after 4", int'(fl_count), 4);
    fault(5, 6, 0, 1, 0);
    expect_eq("used_rows", int'(used_rows), 1);
    expect_eq("sol_rows[0]", int'(sol_rows[0]), 5);
    // a fault on the repaired row is covered and dropped
    @(negedge clk); f_valid = 1; f_row = 5; f_col = 99; #1;
    expect_eq("r_covered", int'(r_covered), 1);
    expect_eq("covered not stored", int'(fault_stored), 0);
    @(negedge clk); f_valid = 0;
    // repeated fault dropped
    fault(7, 1, 1, 0, 0);
    fault(7, 1, 0, 0, 0);
    expect_eq("fl_count", int'(fl_count), 5);
    // column 20: three free spare rows, the fourth fault makes it must-repair;
    // the fault (5,1) in column 1 is covered by row 5 and is not counted
    for (int r = 30; r <= 32; r++) fault(r, 20, 1, 0, 0);
    fault(33, 20, 0, 0, 1);
    expect_eq("used_cols", int'(used_cols), 1);
    expect_eq("sol_cols[0]", int'(sol_cols[0]), 20);
    fault(8, 1, 1, 0, 0);   // column 1 now has (7,1), (8,1) uncovered
    fault(9, 1, 1, 0, 0);
    // forced row
    fault(40, 3, 0, 1, 0, 1);
    expect_eq("used_rows forced", int'(used_rows), 2);
    expect_eq("sol_rows[1]", int'(sol_rows[1]), 40);

    // final phase: uncovered entries are (7,1), (8,1), (9,1)
    @(negedge clk); final_phase = 1; save = 1;
    @(negedge clk); save = 0; #1;
    expect_eq("all_covered before", int'(all_covered), 0);
    expect_eq("cur_row", int'(cur_row), 7);
    expect_eq("cur_col", int'(cur_col), 1);
    r_insert = 1;                    // row 7
    @(negedge clk); r_insert = 0; #1;
    expect_eq("used_rows after insert", int'(used_rows), 3);
    expect_eq("next cur_row", int'(cur_row), 8);
    c_insert = 1;                    // column 1 covers (8,1) and (9,1)
    @(negedge clk); c_insert = 0; #1;
    expect_eq("all_covered after", int'(all_covered), 1);
    expect_eq("used_cols after insert", int'(used_cols), 2);
    restart = 1;
    @(negedge clk); restart = 0; #1;
    expect_eq("restart rows", int'(used_rows), 2);
    expect_eq("restart cols", int'(used_cols), 1);
    expect_eq("restart cover", int'(all_covered), 0);
    expect_eq("restart cur_row", int'(cur_row), 7);
    final_phase = 0;

    // row and column must-repair on the same fault
    pulse_start();
    for (int c = 60; c <= 63; c++) fault(50, c, 1, 0, 0);
    for (int r = 40; r <= 43; r++) fault(r, 70, 1, 0, 0);
    fault(50, 70, 0, 1, 1);
    expect_eq("both rows", int'(used_rows), 1);
    expect_eq("both cols", int'(used_cols), 1);
    @(negedge clk); final_phase = 1; save = 1; #1;
    expect_eq("both all covered", int'(all_covered), 1);
    @(negedge clk); save = 0; final_phase = 0;

    // fault-list overflow
    pulse_start();
    for (int i = 0; i < 32; i++) fault(i, i, 1, 0, 0);
    expect_eq("no overflow yet", int'(unrepairable), 0);
    fault(100, 100, 1, 0, 0);
    expect_eq("overflow", int'(unrepairable), 1);
    fault(101, 101, 0, 0, 0);         // ignored once unrepairable
    expect_eq("fl_count full", int'(fl_count), 32);

    // must-repair with no spare row left
    pulse_start();
    expect_eq("cleared", int'(unrepairable), 0);
    for (int i = 0; i < 4; i++) fault(200 + i, 0, 0, 1, 0, 1);
    expect_eq("spares used", int'(used_rows), 4);
    expect_eq("not yet unrepairable", int'(unrepairable), 0);
    fault(300, 0, 0, 1, 0, 1);
    expect_eq("no spare row", int'(unrepairable), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
