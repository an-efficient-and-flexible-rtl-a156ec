// tb_training_rom: reads every tree record and stage entry through the ROM's
// ports and checks the shape of the cascade without re-deriving its
// contents: 20 stages holding 1047 trees, 2094 nodes and 4535 rectangles;
// every rectangle inside the 20x20 window and non-empty where present; each
// feature's weighted areas cancel (-A1 + w*A2 + 2*A3 = 0), so a flat patch
// gives feature 0; thresholds within +-1/16 and votes within +-1 (Q4.12);
// each stage threshold between the smallest and largest possible vote sum.
// The tree port must return the record one cycle after its address.
module tb_training_rom;
  import fd_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;

  logic [TREE_AW-1:0]      tree_addr = 0;
  tree_t                   tree_q;
  logic [STAGE_AW-1:0]     stage_a = 0, stage_b = 0;
  logic [7:0]              stage_a_trees;
  logic signed [ACC_W-1:0] stage_b_thr;
  int checks = 0, failures = 0;

  training_rom dut (.clk, .tree_addr, .tree_q, .stage_a, .stage_a_trees, .stage_b, .stage_b_thr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int area(input rect_t r);
    return int'(r.w) * int'(r.h);
  endfunction

  function automatic bit inside_win(input rect_t r);
    return (int'(r.x) + int'(r.w) <= 20) && (int'(r.y) + int'(r.h) <= 20);
  endfunction

  task automatic check_node(input node_t n, input int t);
    check(inside_win(n.r1) && inside_win(n.r2) && inside_win(n.r3), $sformatf("tree %0d rect outside", t));
    check(area(n.r1) > 0 && area(n.r2) > 0 && (!n.has_r3 || area(n.r3) > 0), $sformatf("tree %0d empty rect", t));
    check(n.has_r3 || area(n.r3) == 0, $sformatf("tree %0d stray third rect", t));
    check(-area(n.r1) + int'(n.weight) * area(n.r2) + 2 * area(n.r3) == 0, $sformatf("tree %0d areas do not cancel", t));
    check(int'(n.thr) >= -256 && int'(n.thr) <= 256, $sformatf("tree %0d threshold range", t));
  endtask

  initial begin
    int total_trees = 0, rects = 0, nodes = 0;
    int lo_sum [N_STAGES], hi_sum [N_STAGES];
    int s, in_s;
    // stage table
    for (int k = 0; k < int'(N_STAGES); k++) begin
      stage_a = STAGE_AW'(k);
      #1;
      total_trees += int'(stage_a_trees);
      lo_sum[k] = 0; hi_sum[k] = 0;
    end
    check(total_trees == 1047, $sformatf("%0d trees in the stage table", total_trees));
    // tree table, one record per cycle
    s = 0; in_s = 0;
    stage_a = '0;
    for (int t = 0; t <= int'(N_TREES); t++) begin
      if (t < int'(N_TREES)) tree_addr <= TREE_AW'(t);
      @(posedge clk);
      #1;
      if (t > 0) begin
        tree_t r;
        int lo, hi;
        r = tree_q;
        nodes += 2;
        rects += 4 + int'(r.n1.has_r3) + int'(r.n2.has_r3);
        check_node(r.n1, t - 1);
        check_node(r.n2, t - 1);
        lo = int'(r.left); hi = int'(r.left);
        if (int'(r.right) < lo) lo = int'(r.right);
        if (int'(r.right) > hi) hi = int'(r.right);
        if (int'(r.root) < lo) lo = int'(r.root);
        if (int'(r.root) > hi) hi = int'(r.root);
        check(lo >= -4096 && hi <= 4096, "vote range");
        lo_sum[s] += lo; hi_sum[s] += hi;
        in_s++;
        stage_a = STAGE_AW'(s);
        #1;
        if (in_s == int'(stage_a_trees)) begin s++; in_s = 0; end
      end
    end
    check(nodes == 2094, $sformatf("%0d nodes", nodes));
    check(rects == 4535, $sformatf("%0d rectangles", rects));
    check(s == 20, $sformatf("%0d stages walked", s));
    for (int k = 0; k < int'(N_STAGES); k++) begin
      stage_b = STAGE_AW'(k);
      #1;
      check(int'(stage_b_thr) > lo_sum[k] && int'(stage_b_thr) < hi_sum[k],
            $sformatf("stage %0d threshold %0d outside (%0d, %0d)", k, stage_b_thr, lo_sum[k], hi_sum[k]));
    end
    // one-cycle read latency: a new address does not show before the edge
    tree_addr <= 0;
    @(posedge clk);
    #1;
    begin
      tree_t r0;
      r0 = tree_q;
      tree_addr <= 1;
      #2;
      check(tree_q == r0, "tree port is not registered");
      @(posedge clk);
      #1;
      check(tree_q != r0, "tree port did not advance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
