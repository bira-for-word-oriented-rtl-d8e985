// Word-oriented fault adapter: maps a BIST triplet (R, C, S) to the fault
// address the must-repair analyzer takes.
//
// The BIST engine of a word-oriented memory reports a failing word as its
// row address R, column address C and failure syndrome S (the XOR of read
// data and expected data, one bit per bit of the word). How the triplet is
// mapped depends on the column repair of the memory (MEM_TYPE):
//   MEM_BIT    : bit-oriented memory; the triplet is the fault address and
//                S is ignored apart from being nonzero.
//   MEM_TYPE_A : a spare column group replaces the same column address in
//                every bit group, so the problem is the bit-oriented one:
//                S is dropped and (R, C) passed on.
//   MEM_TYPE_B : each spare column replaces one bit of one column address,
//                and at most one column of a word can be replaced. The
//                column address is extended by the index of the failing bit
//                (virtual column address {C, bit}). If S has more than one
//                1, the row cannot be repaired by columns: force_row marks
//                it must-repair and the virtual column is not used.
// A triplet with S = 0 carries no fault and is dropped.
//
// Interface: t_* in, f_* out, same cycle (purely combinational), so the
// analyzer keeps up with a BIST that reports a triplet every cycle.
// VCOL_W = COL_W + log2(W) for MEM_TYPE_B, else COL_W.
// The three mappings follow the document; dropping S = 0 is this design's.
module word_fault_adapter
  import bira_pkg::*;
#(
  parameter mem_type_e    MEM_TYPE = MEM_TYPE_B,
  parameter int unsigned  ROW_W    = 10,
  parameter int unsigned  COL_W    = 8,
  parameter int unsigned  W        = 8,
  localparam int unsigned BW       = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned VCOL_W   = (MEM_TYPE == MEM_TYPE_B) ? COL_W + BW : COL_W
) (
  input  logic              t_valid,
  input  logic [ROW_W-1:0]  t_row,
  input  logic [COL_W-1:0]  t_col,
  input  logic [W-1:0]      t_syn,
  output logic              f_valid,
  output logic [ROW_W-1:0]  f_row,
  output logic [VCOL_W-1:0] f_col,
  output logic              f_force_row
);

  assign f_valid = t_valid && (t_syn != '0);
  assign f_row   = t_row;

  if (MEM_TYPE == MEM_TYPE_B) begin : g_type_b
    logic [BW-1:0] bit_idx;
    logic          multi;

    // Index of the failing bit, and whether more than one bit failed.
    always_comb begin
      logic seen;
      bit_idx = '0;
      seen    = 1'b0;
      multi   = 1'b0;
      for (int i = 0; i < W; i++)
        if (t_syn[i]) begin
          if (seen) multi = 1'b1;
          seen    = 1'b1;
          bit_idx = BW'(i);
        end
    end

    assign f_col       = {t_col, bit_idx};
    assign f_force_row = multi;
  end else begin : g_type_a
    assign f_col       = t_col;
    assign f_force_row = 1'b0;
  end

endmodule
