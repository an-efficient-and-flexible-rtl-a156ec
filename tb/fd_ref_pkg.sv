// fd_ref_pkg: reference model of the cascade for the testbenches.
//
// Classifies a 20x20 window straight from its pixels: rectangle sums are
// summed pixel by pixel (no integral image), NF is found by a plain search
// for the integer square root, and the tree and stage rules are written out
// from the algorithm: feature = -S1 + w*S2 + 2*S3, node test feature <
// threshold*NF (threshold scaled as (t*NF) >>> 12), comparison type inverts,
// vote = n1 ? (n2 ? left : right) : root, stage passes when the vote sum is at
// least the stage threshold. Also gives the number of issue cycles the
// hardware should spend up to a given tree (one per tree, two for a tree with
// a third rectangle), and a generator of structured test images.
package fd_ref_pkg;
  import fd_pkg::*;

  typedef logic [6:0] win_t [WIN][WIN];

  tree_t                   ref_trees [N_TREES];
  logic signed [ACC_W-1:0] ref_thr   [N_STAGES];
  bit                      ref_ready = 0;

  function automatic void ref_init();
    for (int t = 0; t < int'(N_TREES); t++) ref_trees[t] = gen_tree(t);
    for (int s = 0; s < int'(N_STAGES); s++) ref_thr[s] = gen_stage_thr(s);
    ref_ready = 1;
  endfunction

  function automatic longint unsigned sqrt_floor(input longint unsigned v);
    longint unsigned r;
    r = 0;
    for (int b = 31; b >= 0; b--)
      if ((r + (64'd1 << b)) * (r + (64'd1 << b)) <= v) r = r + (64'd1 << b);
    return r;
  endfunction

  function automatic int rsum(input win_t p, input rect_t r);
    int s;
    s = 0;
    for (int y = int'(r.y); y < int'(r.y) + int'(r.h); y++)
      for (int x = int'(r.x); x < int'(r.x) + int'(r.w); x++)
        s += int'(p[y][x]);
    return s;
  endfunction

  function automatic longint unsigned window_nf(input win_t p);
    longint unsigned s, sq;
    s = 0; sq = 0;
    for (int y = 0; y < int'(WIN); y++)
      for (int x = 0; x < int'(WIN); x++) begin
        s  += longint'(p[y][x]);
        sq += longint'(p[y][x]) * longint'(p[y][x]);
      end
    return sqrt_floor(longint'(N_PIX) * sq - s * s);
  endfunction

  function automatic bit node_active(input win_t p, input node_t n, input longint nf);
    longint f, t;
    f = -longint'(rsum(p, n.r1)) + longint'(n.weight) * rsum(p, n.r2) + 2 * rsum(p, n.r3);
    t = (longint'(n.thr) * nf) >>> THR_FRAC;
    return (f < t) ^ n.pol;
  endfunction

  // returns the stage that rejected the window, or N_STAGES for a face;
  // last_tree is the index of the last tree whose vote was needed
  function automatic int classify(input win_t p, output int last_tree);
    longint nf, acc;
    int t;
    bit a1, a2;
    if (!ref_ready) ref_init();
    nf = longint'(window_nf(p));
    t = 0;
    for (int s = 0; s < int'(N_STAGES); s++) begin
      acc = 0;
      for (int k = 0; k < int'(STAGE_SIZES[s]); k++) begin
        a1 = node_active(p, ref_trees[t].n1, nf);
        a2 = node_active(p, ref_trees[t].n2, nf);
        acc += a1 ? (a2 ? longint'(ref_trees[t].left) : longint'(ref_trees[t].right))
                  : longint'(ref_trees[t].root);
        t++;
      end
      last_tree = t - 1;
      if (acc < longint'(ref_thr[s])) return s;
    end
    return N_STAGES;
  endfunction

  // cycles the tree walker spends issuing trees 0..last_tree
  function automatic int issue_cycles(input int last_tree);
    int c;
    if (!ref_ready) ref_init();
    c = 0;
    for (int t = 0; t <= last_tree; t++)
      c += (ref_trees[t].n1.has_r3 || ref_trees[t].n2.has_r3) ? 2 : 1;
    return c;
  endfunction

  // structured 8-bit test images: 0 noise, 1 gradient, 2 flat with blocks
  function automatic logic [7:0] clamp8(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

endpackage
