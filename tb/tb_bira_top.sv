// Full-size end-to-end testbench of bira_top with every parameter at its
// default: four spare rows, four spare columns, a 32-entry fault-list,
// bit-oriented memory. It runs 140 tests drawn from seven scenarios (sparse
// random faults, a row with too many faults, a column with too many faults,
// dense maps that overflow, repeated faults, a fault that makes its row and
// column must-repair at once, and the diagonal map that makes the final
// analysis take its longest), one fault per cycle with random idle cycles,
// then bist_done. Each result is checked against a brute-force minimum
// (bira_ref_pkg): repairability, cost, coverage of every fault by the
// reported spares, and the final-analysis cycle count against
// 1 + C(L, Rf) * (L + 1) + (L + 1), L and Rf the spares left free after the
// must-repair analysis (exactly 640 cycles for the diagonal map). Every
// mechanism of the analyzer is counted, and one that never occurred is a
// failure.
module tb_bira_top;
  import bira_pkg::*;
  import bira_ref_pkg::*;
  localparam int unsigned R        = 4;
  localparam int unsigned C        = 4;
  localparam mem_type_e   MEM_TYPE = MEM_BIT;
  localparam int          TRIALS   = 140;
  int checks, failures;
  bit finished;
  localparam int unsigned ROW_W  = 10;
  localparam int unsigned COL_W  = 8;
  localparam int unsigned W      = 8;
  localparam int unsigned VCOL_W = (MEM_TYPE == MEM_TYPE_B || MEM_TYPE == MEM_TYPE_C) ? COL_W + 3 : COL_W;
  localparam int unsigned KW     = $clog2(R + C + 2);

  logic clk = 0, rst_n = 0, start = 0, bist_valid = 0, bist_done = 0;
  logic [ROW_W-1:0] bist_row = '0;
  logic [COL_W-1:0] bist_col = '0;
  logic [W-1:0]     bist_syn = '0;
  logic early_unrepairable, done, repairable;
  logic [R-1:0][ROW_W-1:0]  rep_rows;
  logic [R-1:0]             rep_row_valid;
  logic [C-1:0][VCOL_W-1:0] rep_cols;
  logic [C-1:0]             rep_col_valid;
  logic [KW-1:0]            rep_cost;

  bira_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int n_store, n_rmr, n_cmr, n_both, n_cov_drop, n_dup_drop, n_force, n_early,
      n_final_unrep, n_success, n_prune, n_exhaust, n_rebuild, n_repaired;
  if (MEM_TYPE == MEM_TYPE_C) begin : g_count_c
    always @(posedge clk) if (rst_n) begin
      n_store    += int'(dut.g_type_c.u_mra.fault_stored);
      n_rmr      += int'(dut.g_type_c.u_mra.r_mustrepair);
      n_cmr      += int'(dut.g_type_c.u_mra.c_mustrepair);
      n_both     += int'(dut.g_type_c.u_mra.r_mustrepair && dut.g_type_c.u_mra.c_mustrepair);
      n_cov_drop += int'(!dut.g_type_c.u_mra.unrepairable &&
                         (dut.g_type_c.u_mra.r_covered || dut.g_type_c.u_mra.c_covered));
      n_dup_drop += int'(dut.g_type_c.u_mra.fault_merged);
      n_force    += int'(dut.g_type_c.u_mra.c_mustrepair &&
                         $countones(dut.g_type_c.u_mra.col_mr) > 1);
    end
  end else begin : g_count_abit
    always @(posedge clk) if (rst_n) begin
      n_store    += int'(dut.g_type_abit.u_mra.fault_stored);
      n_rmr      += int'(dut.g_type_abit.u_mra.r_mustrepair);
      n_cmr      += int'(dut.g_type_abit.u_mra.c_mustrepair);
      n_both     += int'(dut.g_type_abit.u_mra.r_mustrepair && dut.g_type_abit.u_mra.c_mustrepair);
      n_cov_drop += int'(dut.g_type_abit.u_mra.f_valid && !dut.g_type_abit.u_mra.final_phase &&
                         !dut.g_type_abit.u_mra.unrepairable &&
                         (dut.g_type_abit.u_mra.r_covered || dut.g_type_abit.u_mra.c_covered));
      n_dup_drop += int'(dut.g_type_abit.u_mra.f_valid && !dut.g_type_abit.u_mra.final_phase &&
                         !dut.g_type_abit.u_mra.unrepairable && !dut.g_type_abit.u_mra.r_covered &&
                         !dut.g_type_abit.u_mra.c_covered && dut.g_type_abit.u_mra.dup);
      n_force    += int'(dut.g_type_abit.u_mra.f_valid && dut.g_type_abit.u_mra.f_force_row);
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_success  += int'(dut.u_solver.ev_success);
    n_prune    += int'(dut.u_solver.ev_prune);
    n_exhaust  += int'(dut.u_solver.ev_exhaust);
    n_rebuild  += int'(dut.u_solver.state == S_REBUILD && dut.u_solver.ins_idx == 0);
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL [R=%0d C=%0d type=%0d] %s: got %0d expected %0d",
               R, C, MEM_TYPE, what, got, exp);
    end
  endtask

  // one fault of the map: row index, column index into small pools
  typedef struct { int r; int c; bit multi; } gen_t;

  initial begin
    checks = 0; failures = 0; finished = 0;
    {n_store, n_rmr, n_cmr, n_both, n_cov_drop, n_dup_drop, n_force, n_early,
     n_final_unrep, n_success, n_prune, n_exhaust, n_rebuild, n_repaired} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TRIALS; t++) begin
      gen_t   g[$];
      fault_t ref_f[$];
      int     scen, row_base, col_base, hr, hc;
      int     exp_cost, cycles, bound, rf, l, used_r, used_c;
      bit     diag;
      static bit shown = 0;
      g.delete();
      ref_f.delete();
      scen     = t % 7;
      row_base = $urandom_range(0, (1 << ROW_W) - 16);
      col_base = $urandom_range(0, (1 << COL_W) / 2 - 16);
      diag     = 0;
      case (scen)
        0: repeat ($urandom_range(0, 12)) g.push_back('{$urandom_range(0, 11), $urandom_range(0, 11), 0});
        1: begin
          hr = $urandom_range(0, 11);
          for (int k = 0; k < C + 1 + $urandom_range(0, 1); k++) g.push_back('{hr, k, 0});
          repeat ($urandom_range(0, 6)) g.push_back('{$urandom_range(0, 11), $urandom_range(0, 11), 0});
        end
        2: begin
          hc = $urandom_range(0, 11);
          for (int k = 0; k < R + 1 + $urandom_range(0, 1); k++)
            g.push_back('{k, hc, MEM_TYPE == MEM_TYPE_C});
          repeat ($urandom_range(0, 6)) g.push_back('{$urandom_range(0, 11), $urandom_range(0, 11), 0});
        end
        3: repeat ($urandom_range(15, 8 * (R + C))) g.push_back('{$urandom_range(0, 11), $urandom_range(0, 11), 0});
        4: begin
          repeat ($urandom_range(4, 10)) g.push_back('{$urandom_range(0, 11), $urandom_range(0, 11), 0});
          for (int k = g.size() - 1; k >= 0; k -= 2) g.push_back(g[k]);
        end
        5: begin
          for (int k = 0; k < C; k++) g.push_back('{0, k + 1, 0});
          for (int k = 0; k < R; k++) g.push_back('{k + 1, 0, 0});
          g.push_back('{0, 0, 0});
          repeat ($urandom_range(0, 4)) g.push_back('{$urandom_range(0, 11), $urandom_range(0, 11), 0});
        end
        default: begin
          diag = 1;
          for (int k = 0; k < R + C; k++) g.push_back('{k, k, 0});
        end
      endcase
      // type B: some words fail in several bits
      if ((MEM_TYPE == MEM_TYPE_B || MEM_TYPE == MEM_TYPE_C) && !diag)
        foreach (g[k]) if ($urandom_range(0, 9) == 0) g[k].multi = 1;

      // reference fault list
      foreach (g[k]) begin
        fault_t f;
        f.row = row_base + g[k].r;
        f.force_row = g[k].multi;
        if (MEM_TYPE == MEM_TYPE_B) f.col = (col_base + g[k].c / 2) * 8 + (g[k].c % 2);
        else if (MEM_TYPE == MEM_TYPE_C) f.col = (col_base + g[k].c / 2) * 8 + (g[k].c % 2) * 2;
        else f.col = col_base + g[k].c;
        if (MEM_TYPE == MEM_TYPE_C) f.force_row = 0;
        ref_f.push_back(f);
        // type C: a multi-bit word is two faults, bits 2m and 2m+1
        if (MEM_TYPE == MEM_TYPE_C && g[k].multi) begin
          f.col = f.col + 1;
          ref_f.push_back(f);
        end
      end
      exp_cost = min_repair_cost(ref_f, R, C);

      // drive the test
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      foreach (g[k]) begin
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        bist_valid = 1;
        bist_row   = ROW_W'(row_base + g[k].r);
        if (MEM_TYPE == MEM_TYPE_C) begin
          bist_col = COL_W'(col_base + g[k].c / 2);
          bist_syn = g[k].multi ? (W'(3) << (g[k].c % 2) * 2) : (W'(1) << (g[k].c % 2) * 2);
        end else if (MEM_TYPE == MEM_TYPE_B) begin
          bist_col = COL_W'(col_base + g[k].c / 2);
          bist_syn = g[k].multi ? (W'(3) << (g[k].c % 2) * 2) : (W'(1) << (g[k].c % 2));
        end else begin
          bist_col = COL_W'(col_base + g[k].c);
          bist_syn = (MEM_TYPE == MEM_TYPE_A) ? W'($urandom_range(1, 255)) : W'(1);
        end
        @(negedge clk);
        bist_valid = 0;
      end
      bist_done = 1;
      used_r = int'(dut.u_solver.used_rows);
      used_c = int'(dut.u_solver.used_cols);
      if (early_unrepairable) n_early++;
      @(negedge clk);
      bist_done = 0;
      cycles = 1;
      while (!done && cycles < 100000) begin
        @(negedge clk);
        cycles++;
      end
      expect_eq($sformatf("trial %0d repairable", t), int'(repairable), int'(exp_cost >= 0));
      if (!repairable && !early_unrepairable) n_final_unrep++;
      if (exp_cost >= 0 && repairable) begin
        int used;
        used = 0;
        n_repaired++;
        expect_eq($sformatf("trial %0d cost", t), int'(rep_cost), exp_cost);
        for (int i = 0; i < R; i++) used += int'(rep_row_valid[i]);
        for (int i = 0; i < C; i++) used += int'(rep_col_valid[i]);
        expect_eq($sformatf("trial %0d spares listed", t), used, exp_cost);
        foreach (ref_f[k]) begin
          bit cov;
          cov = 0;
          for (int i = 0; i < R; i++)
            if (rep_row_valid[i] && int'(rep_rows[i]) == ref_f[k].row) cov = 1;
          if (!ref_f[k].force_row)
            for (int i = 0; i < C; i++)
              if (rep_col_valid[i] && int'(rep_cols[i]) == ref_f[k].col) cov = 1;
          expect_eq($sformatf("trial %0d fault %0d covered", t, k), int'(cov), 1);
        end
      end
      // final-analysis time
      if (!early_unrepairable) begin
        rf = R - used_r;
        l  = R + C - used_r - used_c;
        bound = 1 + int'(binom(l, rf)) * (l + 1) + (exp_cost >= 0 ? l + 1 : 0);
        checks++;
        if (cycles > bound || (diag && cycles != bound)) begin
          failures++;
          $display("FAIL [R=%0d C=%0d] trial %0d: final analysis took %0d cycles, bound %0d",
                   R, C, t, cycles, bound);
        end
        if (diag && !shown) begin
          shown = 1;
          $display("[R=%0d C=%0d type=%0d] worst-case final analysis: %0d cycles",
                   R, C, MEM_TYPE, cycles);
        end
      end else begin
        expect_eq($sformatf("trial %0d early done", t), cycles, 1);
      end
    end

    $display("[R=%0d C=%0d type=%0d] stored=%0d row_mr=%0d col_mr=%0d both_mr=%0d covered_drop=%0d dup_drop=%0d forced_row=%0d early_unrep=%0d final_unrep=%0d repaired=%0d success=%0d prune=%0d exhaust=%0d rebuild=%0d",
             R, C, MEM_TYPE, n_store, n_rmr, n_cmr, n_both, n_cov_drop, n_dup_drop, n_force,
             n_early, n_final_unrep, n_repaired, n_success, n_prune, n_exhaust, n_rebuild);
    expect_eq("fault stored happened", int'(n_store > 0), 1);
    expect_eq("row must-repair happened", int'(n_rmr > 0), 1);
    expect_eq("column must-repair happened", int'(n_cmr > 0), 1);
    expect_eq("row+column must-repair happened", int'(n_both > 0), 1);
    expect_eq("covered fault dropped", int'(n_cov_drop > 0), 1);
    expect_eq("repeated fault dropped", int'(n_dup_drop > 0), 1);
    expect_eq("early unrepairable happened", int'(n_early > 0), 1);
    expect_eq("final-analysis unrepairable happened", int'(n_final_unrep > 0), 1);
    expect_eq("strategy success happened", int'(n_success > 0), 1);
    expect_eq("Better-low restart happened", int'(n_prune > 0), 1);
    expect_eq("strategy exhausted happened", int'(n_exhaust > 0), 1);
    expect_eq("rebuild happened", int'(n_rebuild > 0), 1);
    if (MEM_TYPE == MEM_TYPE_B) expect_eq("forced row happened", int'(n_force > 0), 1);
    if (MEM_TYPE == MEM_TYPE_C) expect_eq("several column must-repairs at once happened", int'(n_force > 0), 1);
    finished = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
