// Shared types and helpers of the built-in repair analyzer (BIRA).
//
// The analyzer finds, for a memory array with R spare rows and C spare
// columns, a repair solution that uses the fewest spare elements. Must-repair
// analysis runs on the fly while an external BIST engine tests the array; the
// final analysis afterwards enumerates repair strategies with a k-subset
// enumerator. The types below are shared by the analyzer blocks.
package bira_pkg;

  // Kind of memory array the BIST engine reports faults of.
  //   MEM_BIT    : bit-oriented array, one fault address (row, column).
  //   MEM_TYPE_A : word-oriented, spare column groups replace a column address
  //                in every bit group at once; the syndrome is not needed.
  //   MEM_TYPE_B : word-oriented, each spare column replaces one bit of one
  //                column address ("1 column-per-word replaceable").
  //   MEM_TYPE_C : word-oriented, any faulty column of any word can be
  //                replaced by any spare column; faults are kept as extended
  //                fault addresses (row, column address, failing-bit mask).
  typedef enum logic [1:0] {
    MEM_BIT    = 2'd0,
    MEM_TYPE_A = 2'd1,
    MEM_TYPE_B = 2'd2,
    MEM_TYPE_C = 2'd3
  } mem_type_e;

  // States of the SOLVER.
  typedef enum logic [2:0] {
    S_TEST    = 3'd0,  // BIST running, must-repair analysis in the MRA
    S_EVAL    = 3'd1,  // evaluating one repair strategy
    S_REBUILD = 3'd2,  // re-running the best strategy to rebuild its solution
    S_DONE    = 3'd3   // result valid
  } solver_state_e;

endpackage
