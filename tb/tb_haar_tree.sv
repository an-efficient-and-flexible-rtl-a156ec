// tb_haar_tree: streams random trees back to back (some cycles idle) and
// checks that each vote appears exactly two cycles after its inputs, with
// vote = n1 ? (n2 ? left : right) : root, the node results being worked out
// from the feature test. All three leaves must be selected at some point.
module tb_haar_tree;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic in_valid = 0, vote_valid;
  node_in_t node1, node2;
  logic signed [VOTE_W-1:0] left_val, right_val, root_val, vote;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_root = 0;

  haar_tree dut (.clk, .rst_n, .in_valid, .node1, .node2, .left_val, .right_val, .root_val,
                 .vote_valid, .vote);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic node_in_t rnd_node(output bit act);
    node_in_t v;
    int s1, s2, f;
    s1 = $urandom_range(0, 3000); s2 = $urandom_range(0, 3000);
    v.r1.a = 16'd100; v.r1.b = 16'd50; v.r1.c = 16'd50; v.r1.d = 16'(s1);   // S1 = s1
    v.r2.a = 16'd0;   v.r2.b = 16'd0;  v.r2.c = 16'd0;  v.r2.d = 16'(s2);   // S2 = s2
    v.r3 = '0;
    v.weight = 2'($urandom_range(1, 3));
    v.thr = NTHR_W'($urandom_range(0, 8000) - 4000);
    v.pol = 1'($urandom_range(0, 1));
    f = -s1 + int'(v.weight) * s2;
    act = (f < int'(v.thr)) ^ v.pol;
    return v;
  endfunction

  logic               exp_v [3];
  logic signed [15:0] exp_q [3];

  initial begin
    bit a1, a2;
    foreach (exp_v[i]) exp_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk);
      #1;
      // output check for inputs given two cycles ago
      checks++;
      if (vote_valid !== exp_v[0] || (exp_v[0] && vote !== exp_q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d valid %0d vote %0d expected %0d/%0d", i, vote_valid, vote, exp_v[0], exp_q[0]);
      end
      exp_v[0] = exp_v[1]; exp_q[0] = exp_q[1];
      in_valid <= ($urandom_range(0, 4) != 0);
      node1 <= rnd_node(a1);
      node2 <= rnd_node(a2);
      left_val  <= 16'($urandom());
      right_val <= 16'($urandom());
      root_val  <= 16'($urandom());
      #1;
      exp_v[1] = in_valid;
      exp_q[1] = a1 ? (a2 ? left_val : right_val) : root_val;
      if (in_valid) begin
        if (!a1) n_root++; else if (a2) n_left++; else n_right++;
      end
    end
    checks++;
    if (n_left == 0 || n_right == 0 || n_root == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
