// Content addressable memory with one valid bit per word.
//
// Used for the fault-list (fault row and column addresses) and for the
// solution record (spare rows and columns allocated so far). A write stores
// wdata at waddr and sets that word's valid bit. Every cycle the key is
// compared against all words; match[i] is high only for valid words equal
// to the key, so unwritten entries can never match. clear drops all valid
// bits (start of a new test); restore loads the whole valid vector at once,
// which is how the solution record returns to the state saved right after
// the must-repair analysis. All words and valid bits are also visible on
// words/valid, which the analyzer uses to read an entry and to report the
// final solution.
//
// Timing: match is combinational from key and the stored words; writes,
// clear and restore take effect at the next rising clock edge
// (priority: clear, restore, write). Reset is asynchronous, active low.
//
// The document uses custom-designed CAM cells with a 1.7 ns read budget at
// 400 MHz; here the CAM is an array of registers and comparators.
module bira_cam #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 10,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic                           restore,
  input  logic [DEPTH-1:0]               restore_valid,
  input  logic                           we,
  input  logic [AW-1:0]                  waddr,
  input  logic [WIDTH-1:0]               wdata,
  input  logic [WIDTH-1:0]               key,
  output logic [DEPTH-1:0]               match,
  output logic [DEPTH-1:0]               valid,
  output logic [DEPTH-1:0][WIDTH-1:0]    words
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      words <= '0;
    end else if (clear) begin
      valid <= '0;
    end else if (restore) begin
      valid <= restore_valid;
    end else if (we) begin
      valid[waddr] <= 1'b1;
      words[waddr] <= wdata;
    end
  end

  always_comb
    for (int i = 0; i < DEPTH; i++)
      match[i] = valid[i] && (words[i] == key);

endmodule
