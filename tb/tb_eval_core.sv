// tb_eval_core: the Evaluator's core with its ROM, integral-image buffer and
// tree, the preprocessing engine and square root replaced by the testbench.
// When the core starts a load, the testbench writes the window's integral
// image into the write-side buffer and returns NF a random time later. Each
// result (exit stage, face flag, tag) is compared with the reference cascade,
// the classification time with one tree per issue cycle. Also checked: the
// core waits with the next window until the pending result has been read, a
// second start while a window is pending is refused, and STATUS reports it.
module tb_eval_core;
  import fd_pkg::*;
  import fd_ref_pkg::*;
  localparam int unsigned NWIN = 30;
  localparam int unsigned LATENCY = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  axil_req_t axil_req;
  axil_rsp_t axil_rsp;
  logic prep_start, nf_valid = 0, buf_sel, t_valid, vote_valid, wr_en = 0;
  logic [31:0] prep_addr, prep_stride;
  logic [NF_W-1:0] nf = 0;
  ii_addr_t rd_addr [N_RD];
  ii_t rd_data [N_RD];
  ii_addr_t wr_addr = 0;
  ii_t wr_data = 0;
  logic [TREE_AW-1:0] tree_addr;
  tree_t tree_q;
  logic [STAGE_AW-1:0] stage_a, stage_b;
  logic [7:0] stage_a_trees;
  logic signed [ACC_W-1:0] stage_b_thr;
  node_in_t t_node1, t_node2;
  logic signed [VOTE_W-1:0] t_left, t_right, t_root, vote;

  eval_core dut (.clk, .rst_n, .s_axil_req(axil_req), .s_axil_rsp(axil_rsp),
    .prep_start, .prep_addr, .prep_stride, .nf_valid, .nf,
    .buf_sel, .rd_addr, .rd_data, .tree_addr, .tree_q, .stage_a, .stage_a_trees,
    .stage_b, .stage_b_thr, .t_valid, .t_node1, .t_node2, .t_left, .t_right, .t_root,
    .vote_valid, .vote);
  training_rom u_rom (.clk, .tree_addr, .tree_q, .stage_a, .stage_a_trees, .stage_b, .stage_b_thr);
  integral_buffer u_buf (.clk, .buf_sel, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);
  haar_tree u_tree (.clk, .rst_n, .in_valid(t_valid), .node1(t_node1), .node2(t_node2),
                    .left_val(t_left), .right_val(t_right), .root_val(t_root), .vote_valid, .vote);
  axil_bfm u_cpu (.clk, .req(axil_req), .rsp(axil_rsp));

  int checks = 0, failures = 0, n_face = 0, n_reject = 0, n_refused = 0;
  win_t wins [NWIN];
  int   exp_stage [NWIN], exp_cyc [NWIN];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // preprocessing stand-in: window index = prep_addr
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && dut.loading) begin
        int ii [21][21];
        int w;
        w = int'(prep_addr);
        for (int y = 0; y <= 20; y++)
          for (int x = 0; x <= 20; x++) begin
            ii[y][x] = (x == 0 || y == 0) ? 0
                     : int'(wins[w][y-1][x-1]) + ii[y-1][x] + ii[y][x-1] - ii[y-1][x-1];
            wr_en   <= 1;
            wr_addr <= ii_addr_t'(y * 21 + x);
            wr_data <= ii_t'(ii[y][x]);
            @(posedge clk);
          end
        wr_en <= 0;
        repeat ($urandom_range(1, 40)) @(posedge clk);
        nf <= NF_W'(window_nf(wins[w]));
        nf_valid <= 1;
        @(posedge clk);
        nf_valid <= 0;
        @(posedge clk);
      end
    end
  end

  function automatic win_t make_win(input int kind);
    win_t p;
    int c, a, b;
    c = $urandom_range(0, 127); a = $urandom_range(0, 8) - 4; b = $urandom_range(0, 8) - 4;
    for (int y = 0; y < 20; y++)
      for (int x = 0; x < 20; x++)
        case (kind)
          0: p[y][x] = 7'($urandom());
          1: p[y][x] = 7'((c + a * x + b * y + 400) % 128);
          default: p[y][x] = ((x / 4 + y / 3) % 2 == 0) ? 7'(c) : 7'($urandom_range(40, 90));
        endcase
    return p;
  endfunction

  initial begin
    logic [31:0] st, res, tag, cyc;
    int lt;
    ref_init();
    for (int i = 0; i < int'(NWIN); i++) begin
      wins[i] = make_win(i % 3);
      exp_stage[i] = classify(wins[i], lt);
      exp_cyc[i] = issue_cycles(lt) + LATENCY;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(NWIN); i++) begin
      // start window i
      do u_cpu.read(32'(EV_STATUS), st); while (!st[0]);
      u_cpu.write(32'(EV_ADDR), i);
      u_cpu.write(32'(EV_TAG), 1000 + i);
      u_cpu.write(32'(EV_CTRL), 1);
      if (i > 0) begin
        // window i-1's result is pending: window i is loaded but must wait
        repeat (2500) @(posedge clk);
        u_cpu.read(32'(EV_STATUS), st);
        check(st[1] && !st[0], "status while a result is pending and a window is filled");
        u_cpu.write(32'(EV_ADDR), 31);
        u_cpu.write(32'(EV_CTRL), 1);   // must be refused
        u_cpu.read(32'(EV_RTAG), tag);
        check(tag == 1000 + i - 1, $sformatf("result tag %0d, expected %0d", tag, 1000 + i - 1));
        u_cpu.read(32'(EV_CYCLES), cyc);
        check(int'(cyc) == exp_cyc[i-1], $sformatf("window %0d: %0d cycles, expected %0d", i - 1, cyc, exp_cyc[i-1]));
        u_cpu.read(32'(EV_RESULT), res);
        check(int'(res[12:8]) == exp_stage[i-1], $sformatf("window %0d: stage %0d expected %0d", i - 1, res[12:8], exp_stage[i-1]));
        check(res[0] == (exp_stage[i-1] == int'(N_STAGES)), "face flag");
        if (res[0]) n_face++; else n_reject++;
      end
      if (i == int'(NWIN) - 1) begin
        do u_cpu.read(32'(EV_STATUS), st); while (!st[1]);
        u_cpu.read(32'(EV_RTAG), tag);
        check(tag == 1000 + i, "last tag");
        u_cpu.read(32'(EV_RESULT), res);
        check(int'(res[12:8]) == exp_stage[i], "last window stage");
        if (res[0]) n_face++; else n_reject++;
      end
    end
    u_cpu.read(32'(EV_STATUS), st);
    check(st == 32'd1, $sformatf("idle status %h", st));
    check(n_face > 0 && n_reject > 0, "faces and rejections both seen");
    $display("faces=%0d rejects=%0d", n_face, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
