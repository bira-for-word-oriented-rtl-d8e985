// End-to-end testbench of the analyzer for word-oriented memories: the
// harness runs bira_top with four spare rows and four spare columns for a
// type-A memory (syndrome dropped) and a type-B memory (virtual column
// addresses, rows with multi-bit failures forced must-repair), 8-bit words,
// and checks optimal cost, coverage and cycle counts against the reference.
module tb_bira_top_word;
  import bira_pkg::*;
  int ck[3], fl[3];
  bit fin[3];

  bira_harness #(.R(4), .C(4), .MEM_TYPE(MEM_TYPE_A), .TRIALS(70)) ha (.checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  bira_harness #(.R(4), .C(4), .MEM_TYPE(MEM_TYPE_B), .TRIALS(140)) hb (.checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  bira_harness #(.R(4), .C(4), .MEM_TYPE(MEM_TYPE_C), .TRIALS(140)) hc (.checks(ck[2]), .failures(fl[2]), .finished(fin[2]));

  initial begin
    #20000000;  // 2,000,000 clock cycles
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck.sum(), fl.sum() + 1);
    $finish;
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", ck.sum(), fl.sum());
    $finish;
  end
endmodule
