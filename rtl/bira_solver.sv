// SOLVER: final analysis of the built-in repair analyzer.
//
// After the BIST finishes (bist_done), the SOLVER searches all repair
// strategies and keeps the cheapest one that repairs every stored fault.
// A repair strategy is an N = R + C bit word held in the Repair Strategy
// register: bit j = 1 says the j-th fault found uncovered is repaired with a
// spare row, 0 with a spare column. With Rf spare rows and Cf spare columns
// left free by the must-repair analysis, the strategies are the words of
// length LEN = Rf + Cf with exactly Rf ones; the first is the Rf low ones
// and the k-subset enumerator produces each next one in a single step.
//
// Per cycle, while a strategy is evaluated (S_EVAL):
//   - cost = spares used now (must-repair plus inserted), Better = cost is
//     below the best cost found so far (Used Repair ElOpt);
//   - all faults covered: the strategy repairs the array; if Better, it and
//     its cost become Repair Strategy Opt / Used Repair ElOpt; RESTART;
//   - else, Better low, or all LEN strategy bits used: RESTART (give up);
//   - else insert the current fault as a row (R_Insert) or column (C_Insert)
//     according to the next strategy bit.
// RESTART loads the next strategy and makes the MRA restore its saved state
// in the same cycle, so one strategy takes at most LEN + 1 cycles. After
// the last strategy, the best one is run once more (S_REBUILD) so that the
// solution record of the MRA holds its rows and columns, because only the
// strategy, not the solution, is stored. done then rises with repairable.
// If the MRA reports unrepairable when the BIST ends, done rises at once
// with repairable low.
//
// Worst case, no must-repairs, four spare rows and columns:
// C(8,4) * 9 = 630 cycles of search plus at most 9 of rebuild.
//
// Reset asynchronous, active low; start (one cycle) begins a new test.
// The registers, the Better signal, RESTART and the idea of storing the
// strategy instead of the solution follow the document; the strategy bit
// order, the rebuild pass and the cycle-level sequencing are this design's.
module bira_solver
  import bira_pkg::*;
#(
  parameter int unsigned R     = 4,
  parameter int unsigned C     = 4,
  parameter int unsigned STYLE = 0,          // prefix network of the enumerator
  localparam int unsigned N    = R + C,
  localparam int unsigned RCW  = $clog2(R+1),
  localparam int unsigned CCW  = $clog2(C+1),
  localparam int unsigned NW   = $clog2(N+1),
  localparam int unsigned KW   = $clog2(N+2),
  localparam int unsigned SW   = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            bist_done,
  // from the MRA
  input  logic            unrepairable,
  input  logic            all_covered,
  input  logic [RCW-1:0]  used_rows,
  input  logic [CCW-1:0]  used_cols,
  // to the MRA
  output logic            final_phase,
  output logic            save,
  output logic            restart,
  output logic            r_insert,
  output logic            c_insert,
  // result
  output logic            done,
  output logic            repairable,
  output logic [N-1:0]    strategy,
  output logic [N-1:0]    strategy_opt,
  output logic [KW-1:0]   cost_opt,
  output logic            better,
  // events, one cycle each, for monitoring
  output logic            ev_success,
  output logic            ev_prune,
  output logic            ev_exhaust
);

  solver_state_e state;
  logic [NW-1:0]  len, ins_idx;
  logic [N-1:0]   next_strategy;
  logic           last_strategy, found;
  logic [KW-1:0]  cost;
  logic [NW-1:0]  r_free;
  logic [N-1:0]   first_strategy;

  ksubset_enum #(.N(N), .STYLE(STYLE)) u_enum (
    .cur(strategy), .len(len), .next(next_strategy), .last(last_strategy)
  );

  assign cost   = KW'(used_rows) + KW'(used_cols);
  assign better = cost < cost_opt;
  assign r_free = NW'(R) - NW'(used_rows);

  always_comb
    for (int i = 0; i < N; i++)
      first_strategy[i] = (i < int'(r_free));

  assign final_phase = (state != S_TEST);
  assign save        = (state == S_TEST) && bist_done && !unrepairable;

  logic evaluating, strategy_ends, can_insert;
  assign evaluating    = (state == S_EVAL) || (state == S_REBUILD);
  assign can_insert    = !all_covered && (ins_idx < len) &&
                         ((state == S_REBUILD) || better);
  assign strategy_ends = (state == S_EVAL) && !can_insert;

  logic cur_bit;
  assign cur_bit    = strategy[SW'(ins_idx)];
  assign r_insert   = evaluating && can_insert &&  cur_bit;
  assign c_insert   = evaluating && can_insert && !cur_bit;
  assign restart    = strategy_ends;
  assign ev_success = strategy_ends && all_covered && better;
  assign ev_prune   = strategy_ends && !all_covered && !better;
  assign ev_exhaust = strategy_ends && !all_covered && better;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_TEST;
      len          <= '0;
      ins_idx      <= '0;
      strategy     <= '0;
      strategy_opt <= '0;
      cost_opt     <= '1;
      found        <= 1'b0;
      done         <= 1'b0;
      repairable   <= 1'b0;
    end else if (start) begin
      state        <= S_TEST;
      ins_idx      <= '0;
      cost_opt     <= '1;
      found        <= 1'b0;
      done         <= 1'b0;
      repairable   <= 1'b0;
    end else begin
      unique case (state)
        S_TEST: if (bist_done) begin
          if (unrepairable) begin
            state <= S_DONE;
            done  <= 1'b1;
          end else begin
            state    <= S_EVAL;
            len      <= NW'(R + C) - NW'(used_rows) - NW'(used_cols);
            strategy <= first_strategy;
            ins_idx  <= '0;
          end
        end
        S_EVAL: begin
          if (can_insert) begin
            ins_idx <= ins_idx + 1'b1;
          end else begin
            ins_idx <= '0;
            if (all_covered && better) begin
              strategy_opt <= strategy;
              cost_opt     <= cost;
              found        <= 1'b1;
            end
            if (last_strategy) begin
              if (found || (all_covered && better)) begin
                state    <= S_REBUILD;
                strategy <= (all_covered && better) ? strategy : strategy_opt;
              end else begin
                state <= S_DONE;
                done  <= 1'b1;
              end
            end else begin
              strategy <= next_strategy;
            end
          end
        end
        S_REBUILD: begin
          if (can_insert) begin
            ins_idx <= ins_idx + 1'b1;
          end else begin
            state      <= S_DONE;
            done       <= 1'b1;
            repairable <= all_covered;
          end
        end
        S_DONE: ;
        default: state <= S_TEST;
      endcase
    end
  end

endmodule
