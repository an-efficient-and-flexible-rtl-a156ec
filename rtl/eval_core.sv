// eval_core: control core of an Evaluator, walks the cascade for one window.
//
// Command side. The CPU writes the window address, row stride and a tag, then
// sets CTRL.start while STATUS.cmd_ready is 1. The core starts the
// preprocessing engine, which fills the integral-image buffer that is not
// being read; its INF goes through the square-root unit and the resulting NF
// marks the buffer as filled. When the classifier is idle and the previous
// result has been read, the core swaps buf_sel and classifies the new window
// while the next one may already be loading (double buffering).
//
// Classification pipeline, one tree per cycle:
//   I  the tree record (read from the ROM the cycle before) is turned into
//      sixteen corner addresses of four rectangles (node 1 rectangles 1, 2,
//      node 2 rectangles 1, 2). A tree with a third rectangle in either node
//      holds the ROM one more cycle and reads those in a second phase. The
//      node thresholds are multiplied by NF here.
//   D  the sixteen integral values arrive; a first-phase read is parked, and
//      the complete operands go to the tree.
//   T  the tree (two cycles) returns its vote.
//   A  votes are summed per stage; the last tree of a stage compares the sum
//      with the stage threshold (pass when sum >= threshold). A failing stage
//      rejects the window at once and flushes the pipeline; passing the last
//      stage reports a face.
// The walker does not wait for a stage's verdict: it runs on into the next
// stage, and a rejection discards that work. A window that passes every
// stage takes N_TREES + (trees with a third rectangle) issue cycles plus the
// pipeline latency, which EV_CYCLES reports.
//
// Following the description: one tree per cycle with sixteen integral reads,
// the early exit of the cascade, threshold normalisation by NF, double
// buffering controlled by buffer select, a CPU slave interface. This design's
// own: the two-phase read of third rectangles, speculative walking across
// stage boundaries, the register map (fd_pkg) and the result hand-shake.
module eval_core
  import fd_pkg::*;
#(
  parameter int unsigned N_TREES_P  = N_TREES,
  parameter int unsigned N_STAGES_P = N_STAGES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CPU
  input  axil_req_t                s_axil_req,
  output axil_rsp_t                s_axil_rsp,
  // preprocessing engine and square root
  output logic                     prep_start,
  output logic [31:0]              prep_addr,
  output logic [31:0]              prep_stride,
  input  logic                     nf_valid,
  input  logic [NF_W-1:0]          nf,
  // integral image buffer
  output logic                     buf_sel,
  output ii_addr_t                 rd_addr [N_RD],
  input  ii_t                      rd_data [N_RD],
  // training data
  output logic [TREE_AW-1:0]       tree_addr,
  input  tree_t                    tree_q,
  output logic [STAGE_AW-1:0]      stage_a,
  input  logic [7:0]               stage_a_trees,
  output logic [STAGE_AW-1:0]      stage_b,
  input  logic signed [ACC_W-1:0]  stage_b_thr,
  // tree
  output logic                     t_valid,
  output node_in_t                 t_node1,
  output node_in_t                 t_node2,
  output logic signed [VOTE_W-1:0] t_left,
  output logic signed [VOTE_W-1:0] t_right,
  output logic signed [VOTE_W-1:0] t_root,
  input  logic                     vote_valid,
  input  logic signed [VOTE_W-1:0] vote
);

  // ---------------------------------------------------------------- registers
  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr_r;
  logic [31:0] wr_data, rd_data_r;

  logic [31:0] r_addr, r_stride, r_tag;
  logic        loading, filled;
  logic [31:0] load_tag, fill_tag;
  logic [NF_W-1:0] fill_nf;

  logic        res_valid, res_face;
  logic [4:0]  res_stage;
  logic [31:0] res_tag, res_cycles;

  logic        ev_active;
  logic [NF_W-1:0] ev_nf;
  logic [31:0] ev_tag, ev_cycles;

  logic        cmd_ready;
  logic        ev_start;
  logic        finish, finish_face;
  logic [4:0]  finish_stage;

  axil_slave u_axil (
    .clk, .rst_n, .req(s_axil_req), .rsp(s_axil_rsp),
    .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr(rd_addr_r), .rd_data(rd_data_r)
  );

  assign cmd_ready = !loading && !filled;

  always_comb begin
    case (rd_addr_r)
      EV_STATUS: rd_data_r = {29'd0, loading || filled || ev_active, res_valid, cmd_ready};
      EV_ADDR:   rd_data_r = r_addr;
      EV_STRIDE: rd_data_r = r_stride;
      EV_TAG:    rd_data_r = r_tag;
      EV_RESULT: rd_data_r = {19'd0, res_stage, 7'd0, res_face};
      EV_RTAG:   rd_data_r = res_tag;
      EV_CYCLES: rd_data_r = res_cycles;
      default:   rd_data_r = '0;
    endcase
  end

  assign prep_start  = wr_en && (wr_addr == EV_CTRL) && wr_data[0] && cmd_ready;
  assign prep_addr   = r_addr;
  assign prep_stride = r_stride;
  assign ev_start    = filled && !ev_active && !res_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_addr <= '0; r_stride <= '0; r_tag <= '0;
      loading <= 1'b0; filled <= 1'b0;
      load_tag <= '0; fill_tag <= '0; fill_nf <= '0;
      res_valid <= 1'b0; res_face <= 1'b0; res_stage <= '0;
      res_tag <= '0; res_cycles <= '0;
      buf_sel <= 1'b0;
      ev_nf <= '0; ev_tag <= '0;
    end else begin
      if (wr_en) begin
        case (wr_addr)
          EV_ADDR:   r_addr   <= wr_data;
          EV_STRIDE: r_stride <= wr_data;
          EV_TAG:    r_tag    <= wr_data;
          default: ;
        endcase
      end
      if (prep_start) begin
        loading  <= 1'b1;
        load_tag <= r_tag;
      end
      if (nf_valid && loading) begin
        loading  <= 1'b0;
        filled   <= 1'b1;
        fill_nf  <= nf;
        fill_tag <= load_tag;
      end
      if (ev_start) begin
        filled  <= 1'b0;
        buf_sel <= !buf_sel;
        ev_nf   <= fill_nf;
        ev_tag  <= fill_tag;
      end
      if (rd_en && rd_addr_r == EV_RESULT) res_valid <= 1'b0;
      if (finish) begin
        res_valid  <= 1'b1;
        res_face   <= finish_face;
        res_stage  <= finish_stage;
        res_tag    <= ev_tag;
        res_cycles <= ev_cycles + 1;
      end
    end
  end

  // ---------------------------------------------------------------- walker
  logic                 run;
  logic [TREE_AW-1:0]   n_idx;
  logic [STAGE_AW-1:0]  n_stage;
  logic [7:0]           n_cnt;

  logic                 i_valid, i_phase, i_last, i_final;
  logic [TREE_AW-1:0]   i_idx;
  logic [STAGE_AW-1:0]  i_stage;

  tree_t                rec;
  logic                 extra, stall, advance;

  assign rec     = tree_q;
  assign extra   = rec.n1.has_r3 || rec.n2.has_r3;
  assign stall   = i_valid && extra && !i_phase;
  assign advance = run && !stall;
  assign tree_addr = stall ? i_idx : n_idx;
  assign stage_a   = n_stage;

  // corner addresses of a rectangle
  function automatic void rect_addr(input rect_t r, output ii_addr_t a, output ii_addr_t b,
                                    output ii_addr_t c, output ii_addr_t d);
    a = II_AW'(r.y) * II_AW'(II_DIM) + II_AW'(r.x);
    b = a + II_AW'(r.w);
    c = a + II_AW'(r.h) * II_AW'(II_DIM);
    d = c + II_AW'(r.w);
  endfunction

  rect_t slot_rect [4];
  always_comb begin
    if (!i_phase) begin
      slot_rect[0] = rec.n1.r1;
      slot_rect[1] = rec.n1.r2;
      slot_rect[2] = rec.n2.r1;
      slot_rect[3] = rec.n2.r2;
    end else begin
      slot_rect[0] = rec.n1.r3;
      slot_rect[1] = rec.n2.r3;
      slot_rect[2] = rec.n1.r3;
      slot_rect[3] = rec.n2.r3;
    end
    for (int s = 0; s < 4; s++)
      rect_addr(slot_rect[s], rd_addr[4*s], rd_addr[4*s+1], rd_addr[4*s+2], rd_addr[4*s+3]);
  end

  function automatic logic signed [NTHR_W-1:0] scale_thr(input logic signed [15:0] t,
                                                         input logic [NF_W-1:0] f);
    logic signed [NF_W+16:0] p;
    p = 33'(t) * signed'({1'b0, f});
    return NTHR_W'(p >>> THR_FRAC);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; n_idx <= '0; n_stage <= '0; n_cnt <= '0;
      i_valid <= 1'b0; i_phase <= 1'b0; i_last <= 1'b0; i_final <= 1'b0;
      i_idx <= '0; i_stage <= '0;
    end else if (ev_start) begin
      run <= 1'b1; n_idx <= '0; n_stage <= '0; n_cnt <= '0;
      i_valid <= 1'b0; i_phase <= 1'b0;
    end else if (finish) begin
      run <= 1'b0; i_valid <= 1'b0; i_phase <= 1'b0;
    end else if (stall) begin
      i_phase <= 1'b1;
    end else if (advance) begin
      i_valid <= 1'b1;
      i_phase <= 1'b0;
      i_idx   <= n_idx;
      i_stage <= n_stage;
      i_last  <= (n_cnt == stage_a_trees - 8'd1);
      i_final <= (32'(n_idx) == N_TREES_P - 1);
      n_idx   <= n_idx + 1'b1;
      if (n_cnt == stage_a_trees - 8'd1) begin
        n_cnt   <= '0;
        n_stage <= n_stage + 1'b1;
      end else begin
        n_cnt <= n_cnt + 1'b1;
      end
      if (32'(n_idx) == N_TREES_P - 1) run <= 1'b0;
    end else begin
      i_valid <= 1'b0;
      i_phase <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- D stage
  logic                     d_valid, d_phase, d_last, d_final;
  logic [STAGE_AW-1:0]      d_stage;
  tree_t                    d_rec;
  logic signed [NTHR_W-1:0] d_thr1, d_thr2;
  ii_t                      hold [N_RD];
  logic                     d_extra;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0; d_phase <= 1'b0; d_last <= 1'b0; d_final <= 1'b0;
      d_stage <= '0; d_rec <= '0; d_thr1 <= '0; d_thr2 <= '0;
    end else begin
      d_valid <= i_valid && !finish && !ev_start;
      d_phase <= i_phase;
      d_last  <= i_last;
      d_final <= i_final;
      d_stage <= i_stage;
      d_rec   <= rec;
      d_thr1  <= scale_thr(rec.n1.thr, ev_nf);
      d_thr2  <= scale_thr(rec.n2.thr, ev_nf);
    end
  end

  assign d_extra = d_rec.n1.has_r3 || d_rec.n2.has_r3;

  always_ff @(posedge clk) begin
    if (d_valid && d_extra && !d_phase)
      for (int k = 0; k < int'(N_RD); k++) hold[k] <= rd_data[k];
  end

  function automatic corners_t pick(input ii_t v [N_RD], input int unsigned s);
    corners_t c;
    c.a = v[4*s]; c.b = v[4*s+1]; c.c = v[4*s+2]; c.d = v[4*s+3];
    return c;
  endfunction

  always_comb begin
    t_valid = d_valid && !(d_extra && !d_phase) && !finish;
    t_node1.weight = d_rec.n1.weight;
    t_node1.thr    = d_thr1;
    t_node1.pol    = d_rec.n1.pol;
    t_node2.weight = d_rec.n2.weight;
    t_node2.thr    = d_thr2;
    t_node2.pol    = d_rec.n2.pol;
    t_node1.r3 = '0;
    t_node2.r3 = '0;
    if (d_extra) begin
      t_node1.r1 = pick(hold, 0);
      t_node1.r2 = pick(hold, 1);
      t_node2.r1 = pick(hold, 2);
      t_node2.r2 = pick(hold, 3);
      if (d_rec.n1.has_r3) t_node1.r3 = pick(rd_data, 0);
      if (d_rec.n2.has_r3) t_node2.r3 = pick(rd_data, 1);
    end else begin
      t_node1.r1 = pick(rd_data, 0);
      t_node1.r2 = pick(rd_data, 1);
      t_node2.r1 = pick(rd_data, 2);
      t_node2.r2 = pick(rd_data, 3);
    end
    t_left  = d_rec.left;
    t_right = d_rec.right;
    t_root  = d_rec.root;
  end

  // ---------------------------------------------------------------- T / A
  logic                    t1_v, t1_last, t1_final, t2_v, t2_last, t2_final;
  logic [STAGE_AW-1:0]     t1_stage, t2_stage;
  logic signed [ACC_W-1:0] acc, acc_next;
  logic                    a_v;

  assign a_v      = t2_v && vote_valid && ev_active;
  assign acc_next = acc + ACC_W'(vote);
  assign stage_b  = t2_stage;

  always_comb begin
    finish       = 1'b0;
    finish_face  = 1'b0;
    finish_stage = t2_stage;
    if (a_v && t2_last) begin
      if (acc_next < stage_b_thr) begin
        finish = 1'b1;
      end else if (t2_final) begin
        finish       = 1'b1;
        finish_face  = 1'b1;
        finish_stage = 5'(N_STAGES_P);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_v <= 1'b0; t1_last <= 1'b0; t1_final <= 1'b0; t1_stage <= '0;
      t2_v <= 1'b0; t2_last <= 1'b0; t2_final <= 1'b0; t2_stage <= '0;
      acc <= '0; ev_active <= 1'b0; ev_cycles <= '0;
    end else begin
      t1_v     <= t_valid && !ev_start;
      t1_last  <= d_last;
      t1_final <= d_final;
      t1_stage <= d_stage;
      t2_v     <= t1_v && !finish && !ev_start;
      t2_last  <= t1_last;
      t2_final <= t1_final;
      t2_stage <= t1_stage;
      ev_cycles <= ev_cycles + 1;
      if (ev_start) begin
        ev_active <= 1'b1;
        acc       <= '0;
        ev_cycles <= '0;
      end else if (finish) begin
        ev_active <= 1'b0;
        t1_v      <= 1'b0;
        t2_v      <= 1'b0;
      end else if (a_v) begin
        acc <= t2_last ? '0 : acc_next;
      end
    end
  end

endmodule
