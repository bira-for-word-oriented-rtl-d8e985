// Self-checking testbench of word_fault_adapter: random triplets through a
// type-B and a type-A instance (8-bit words), checked against the expected
// virtual column address, forced must-repair row and valid.
module tb_word_fault_adapter;
  import bira_pkg::*;
  logic       t_valid;
  logic [9:0] t_row;
  logic [7:0] t_col;
  logic [7:0] t_syn;
  logic       b_valid, b_force, a_valid, a_force;
  logic [9:0] b_row, a_row;
  logic [10:0] b_col;
  logic [7:0]  a_col;
  int checks = 0, failures = 0;

  word_fault_adapter #(.MEM_TYPE(MEM_TYPE_B), .ROW_W(10), .COL_W(8), .W(8)) dut_b (
    .t_valid, .t_row, .t_col, .t_syn,
    .f_valid(b_valid), .f_row(b_row), .f_col(b_col), .f_force_row(b_force));
  word_fault_adapter #(.MEM_TYPE(MEM_TYPE_A), .ROW_W(10), .COL_W(8), .W(8)) dut_a (
    .t_valid, .t_row, .t_col, .t_syn,
    .f_valid(a_valid), .f_row(a_row), .f_col(a_col), .f_force_row(a_force));

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (syn=%b)", what, got, exp, t_syn);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 600; i++) begin
      int nbits, pos;
      t_valid = ($urandom_range(0, 7) != 0);
      t_row   = 10'($urandom());
      t_col   = 8'($urandom());
      case ($urandom_range(0, 3))
        0: t_syn = '0;
        1, 2: t_syn = 8'h1 << $urandom_range(0, 7);
        default: t_syn = 8'($urandom());
      endcase
      #1;
      nbits = 0; pos = 0;
      for (int b = 0; b < 8; b++) if (t_syn[b]) begin nbits++; pos = b; end
      expect_eq("B valid", int'(b_valid), int'(t_valid && nbits > 0));
      expect_eq("B row", int'(b_row), int'(t_row));
      expect_eq("B force", int'(b_force), int'(nbits > 1));
      if (nbits == 1) expect_eq("B vcol", int'(b_col), int'(t_col) * 8 + pos);
      expect_eq("A valid", int'(a_valid), int'(t_valid && nbits > 0));
      expect_eq("A row", int'(a_row), int'(t_row));
      expect_eq("A col", int'(a_col), int'(t_col));
      expect_eq("A force", int'(a_force), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
