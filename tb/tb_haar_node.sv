// tb_haar_node: random corner values, weights, thresholds and comparison
// types; the expected output is the feature test written from the algorithm,
// (-S1 + w*S2 + 2*S3 < thr) xor pol, with S = a - b - c + d, one cycle later.
module tb_haar_node;
  import fd_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;

  node_in_t n;
  logic     active;
  int checks = 0, failures = 0, n_true = 0, n_false = 0;

  haar_node dut (.clk, .n, .active);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int s_of(input corners_t c);
    return int'(c.a) - int'(c.b) - int'(c.c) + int'(c.d);
  endfunction

  function automatic corners_t rnd_corners(input int big);
    corners_t c;
    // a rectangle with pixel sum s and consistent corners
    int s, base;
    s = $urandom_range(0, big);
    base = $urandom_range(0, 60000 - s);
    c.a = ii_t'($urandom_range(0, base / 4));
    c.b = ii_t'(base / 2);
    c.c = ii_t'(base / 2);
    c.d = ii_t'(int'(c.b) + int'(c.c) - int'(c.a) + s);
    return c;
  endfunction

  initial begin
    bit exp_q;
    int f;
    for (int i = 0; i < 3000; i++) begin
      node_in_t v;
      v.r1 = rnd_corners(20000);
      v.r2 = rnd_corners(10000);
      v.r3 = ($urandom_range(0, 3) == 0) ? rnd_corners(8000) : '0;
      v.weight = 2'($urandom_range(1, 3));
      v.thr = NTHR_W'($urandom_range(0, 80000) - 40000);
      v.pol = 1'($urandom_range(0, 1));
      f = -s_of(v.r1) + int'(v.weight) * s_of(v.r2) + 2 * s_of(v.r3);
      // aim some thresholds right at the feature value
      if (i % 5 == 0) v.thr = NTHR_W'(f + $urandom_range(0, 2) - 1);
      n <= v;
      exp_q = (f < int'(v.thr)) ^ v.pol;
      @(posedge clk);
      #1;
      checks++;
      if (active !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL: feature %0d thr %0d pol %0d got %0d", f, v.thr, v.pol, active);
      end
      if (exp_q) n_true++; else n_false++;
    end
    checks++;
    if (n_true == 0 || n_false == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
