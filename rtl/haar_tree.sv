// haar_tree: two-node decision tree returning one of three leaf votes.
//
// Node 1 (the root) and node 2 evaluate their Haar features in parallel. A
// first multiplexer, steered by node 2, picks the left or the right value; a
// second one, steered by node 1, picks that result or the root value:
//   vote = n1 ? (n2 ? left : right) : root
// This is the structure of the description's tree diagram; which multiplexer
// input each select value picks is this design's choice. Because node 1's
// comparison type can invert its result, the training data decides on which
// branch of the root the child node hangs.
//
// Timing: fully pipelined, one tree per cycle. vote_valid/vote follow
// in_valid by two cycles (node register, vote register).
module haar_tree
  import fd_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  node_in_t                  node1,
  input  node_in_t                  node2,
  input  logic signed [VOTE_W-1:0]  left_val,
  input  logic signed [VOTE_W-1:0]  right_val,
  input  logic signed [VOTE_W-1:0]  root_val,
  output logic                      vote_valid,
  output logic signed [VOTE_W-1:0]  vote
);

  logic n1_act, n2_act, v1;
  logic signed [VOTE_W-1:0] left_q, right_q, root_q, inner;

  haar_node u_node1 (.clk(clk), .n(node1), .active(n1_act));
  haar_node u_node2 (.clk(clk), .n(node2), .active(n2_act));

  always_ff @(posedge clk) begin
    left_q  <= left_val;
    right_q <= right_val;
    root_q  <= root_val;
  end

  assign inner = n2_act ? left_q : right_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1         <= 1'b0;
      vote_valid <= 1'b0;
      vote       <= '0;
    end else begin
      v1         <= in_valid;
      vote_valid <= v1;
      vote       <= n1_act ? inner : root_q;
    end
  end

endmodule
