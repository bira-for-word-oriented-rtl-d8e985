// Testbench of the SOLVER, run inside the full analyzer (the SOLVER only
// works together with the MRA). It runs the harness for the spare
// configurations of the document's comparison table other than the default
// four/four: 2/2, 3/3 (with the serial prefix enumerator), 4/1 and 5/5,
// bit-oriented, and checks optimal cost,
// coverage, final-analysis cycle counts and that every search mechanism
// (success, Better-low restart, exhausted strategy, rebuild) occurred.
module tb_bira_solver;
  import bira_pkg::*;
  int ck[4], fl[4];
  bit fin[4];
  int checks, failures;

  bira_harness #(.R(2), .C(2), .TRIALS(140)) h22 (.checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  bira_harness #(.R(3), .C(3), .TRIALS(140), .STYLE(1)) h33 (.checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  bira_harness #(.R(4), .C(1), .TRIALS(140)) h41 (.checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  bira_harness #(.R(5), .C(5), .TRIALS(70))  h55 (.checks(ck[3]), .failures(fl[3]), .finished(fin[3]));

  initial begin
    #50000000;  // 5,000,000 clock cycles
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck.sum() , fl.sum() + 1);
    $finish;
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = ck.sum();
    failures = fl.sum();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
