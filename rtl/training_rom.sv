// training_rom: read-only store of the cascade training data of one Evaluator.
//
// Two tables. The tree table holds one record per decision tree (two nodes
// with up to three rectangles each, node thresholds, comparison types and the
// three leaf votes, fd_pkg::tree_t, 208 bits); it is read synchronously, one
// record per cycle, and maps onto block RAM. The stage table holds, per
// cascade stage, its number of trees and its threshold; it is small and read
// combinationally on two independent ports (one for the tree walker, one for
// the vote accumulator).
//
// Contents come from fd_pkg's generator at initialisation time (see fd_pkg for
// the formula). The record layout and the split into two tables are this
// design's own choice; the description only states that the data is held in
// block RAM in a compressed binary format.
//
// Timing: tree_q is the record at tree_addr of the previous cycle.
module training_rom
  import fd_pkg::*;
#(
  parameter int unsigned N_TREES_P  = N_TREES,
  parameter int unsigned N_STAGES_P = N_STAGES
) (
  input  logic                        clk,
  input  logic [TREE_AW-1:0]          tree_addr,
  output tree_t                       tree_q,
  input  logic [STAGE_AW-1:0]         stage_a,
  output logic [7:0]                  stage_a_trees,
  input  logic [STAGE_AW-1:0]         stage_b,
  output logic signed [ACC_W-1:0]     stage_b_thr
);

  tree_t                   trees      [N_TREES_P];
  logic [7:0]              stage_cnt  [N_STAGES_P];
  logic signed [ACC_W-1:0] stage_thr  [N_STAGES_P];

  initial begin
    for (int unsigned t = 0; t < N_TREES_P; t++) trees[t] = gen_tree(t);
    for (int unsigned s = 0; s < N_STAGES_P; s++) begin
      stage_cnt[s] = 8'(STAGE_SIZES[s]);
      stage_thr[s] = gen_stage_thr(s);
    end
  end

  always_ff @(posedge clk) tree_q <= trees[tree_addr];

  assign stage_a_trees = stage_cnt[stage_a];
  assign stage_b_thr   = stage_thr[stage_b];

endmodule
