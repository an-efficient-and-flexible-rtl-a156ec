// evaluator: one classifier core of the face-detection system.
//
// Decides whether a 20x20 sub-window of an 8-bit grey image in shared memory
// is a face candidate by running it through the 20-stage Haar cascade. It
// holds the blocks of the description's Evaluator overview and wires them the
// same way: the preprocessing engine (AXI read master to memory) writes the
// integral image into the double-buffered integral-image buffer and hands INF
// to the square-root unit; the core takes NF, the training data from the ROM
// and the sixteen pixels the buffer returns, drives the decision tree and
// collects its votes; the CPU controls the core through an AXI4-Lite slave.
// In this implementation the buffer's pixels reach the tree through the core,
// which parks the first half of a tree with more than four rectangles.
//
// Interfaces: s_axil_* (register map EV_* in fd_pkg), m_axi_rd_* (32-bit AXI
// read master, bursts of at most 6 beats). Timing: about 41 + 22*24 cycles
// to load a window (overlapped with the previous classification) and at most
// 1394 cycles plus 8 of latency to classify one (1047 trees, 347 of which
// need a second read cycle).
module evaluator
  import fd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    s_axil_req,
  output axil_rsp_t    s_axil_rsp,
  output axi_rd_req_t  m_axi_rd_req,
  input  axi_rd_rsp_t  m_axi_rd_rsp
);

  logic                     prep_start, prep_busy, prep_done, inf_valid;
  logic [31:0]              prep_addr, prep_stride, inf;
  logic                     sq_busy, nf_valid;
  logic [NF_W-1:0]          nf;
  logic                     buf_sel, wr_en;
  ii_addr_t                 wr_addr;
  ii_t                      wr_data;
  ii_addr_t                 rd_addr [N_RD];
  ii_t                      rd_data [N_RD];
  logic [TREE_AW-1:0]       tree_addr;
  tree_t                    tree_q;
  logic [STAGE_AW-1:0]      stage_a, stage_b;
  logic [7:0]               stage_a_trees;
  logic signed [ACC_W-1:0]  stage_b_thr;
  logic                     t_valid, vote_valid;
  node_in_t                 t_node1, t_node2;
  logic signed [VOTE_W-1:0] t_left, t_right, t_root, vote;

  preproc_engine u_prep (
    .clk, .rst_n,
    .start(prep_start), .base_addr(prep_addr), .stride(prep_stride),
    .busy(prep_busy), .done(prep_done), .inf_valid, .inf,
    .wr_en, .wr_addr, .wr_data,
    .axi_req(m_axi_rd_req), .axi_rsp(m_axi_rd_rsp)
  );

  isqrt #(.IN_W(32)) u_sqrt (
    .clk, .rst_n, .in_valid(inf_valid), .in_data(inf),
    .busy(sq_busy), .out_valid(nf_valid), .out_data(nf)
  );

  integral_buffer u_ibuf (
    .clk, .buf_sel, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data
  );

  training_rom u_rom (
    .clk, .tree_addr, .tree_q,
    .stage_a, .stage_a_trees, .stage_b, .stage_b_thr
  );

  haar_tree u_tree (
    .clk, .rst_n, .in_valid(t_valid),
    .node1(t_node1), .node2(t_node2),
    .left_val(t_left), .right_val(t_right), .root_val(t_root),
    .vote_valid, .vote
  );

  eval_core u_core (
    .clk, .rst_n,
    .s_axil_req, .s_axil_rsp,
    .prep_start, .prep_addr, .prep_stride, .nf_valid, .nf,
    .buf_sel, .rd_addr, .rd_data,
    .tree_addr, .tree_q, .stage_a, .stage_a_trees, .stage_b, .stage_b_thr,
    .t_valid, .t_node1, .t_node2, .t_left, .t_right, .t_root,
    .vote_valid, .vote
  );

  // the core only starts a window while the engine and the root unit are idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 prep_start |-> !prep_busy && !sq_busy);
  // a load completes before its INF is produced
  a_done_inf: assert property (@(posedge clk) disable iff (!rst_n) prep_done == inf_valid);

endmodule
