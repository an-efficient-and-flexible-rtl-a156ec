// fd_pkg: constants, types and the training-data generator shared by the
// face-detection design.
//
// Sizes that follow the design description: 20x20 sub-window, integral image
// built from 7-bit pixels, a 24x22 pixel fetch region, 20 cascade stages with
// 1047 two-node trees (2094 nodes, 4535 rectangles), a 16-read integral-image
// buffer and nearest-neighbour down-scaling by 1.2.
//
// Own choices: all fixed-point formats (Q4.12 node thresholds and leaf votes),
// the training-record layout, the 32-bit AXI structs and the register maps.
//
// Training data. The real cascade is an off-line trained classifier that is not
// part of this RTL. gen_tree()/gen_stage_thr() produce a deterministic
// synthetic cascade with the same shape: per-stage tree counts of the public
// 20-stage, 1047-tree frontal-face cascade, every sixth node (up to node 2081)
// with a third rectangle so that the total is 4535 rectangles, Haar-like
// rectangle pairs whose weighted sums cancel on a flat patch, thresholds in
// [-1/16, 1/16] and leaf votes in [-1, 1]. Stage threshold s is
//   sum(min leaf) + (sum(max leaf) - sum(min leaf)) * 40 / 128
// over the trees of stage s. Replacing the generator by real trained data
// changes no hardware.
package fd_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned WIN      = 20;            // sub-window side
  localparam int unsigned II_DIM   = WIN + 1;       // integral image incl. zero row/col
  localparam int unsigned II_DEPTH = II_DIM * II_DIM;   // 441 entries
  localparam int unsigned II_AW    = 9;
  localparam int unsigned II_W     = 16;            // 400 * 127 = 50800 < 2^16
  localparam int unsigned PIX_BITS = 7;             // pixel bits used for the integral
  localparam int unsigned CACHE_W  = 24;            // fetched region, bytes per row
  localparam int unsigned CACHE_H  = 22;            // fetched region, rows
  localparam int unsigned N_PIX    = WIN * WIN;     // N of the normalisation
  localparam int unsigned N_RD     = 16;            // integral reads per cycle

  // ---------------------------------------------------------------- cascade
  localparam int unsigned N_STAGES  = 20;
  localparam int unsigned N_TREES   = 1047;
  localparam int unsigned TREE_AW   = 11;
  localparam int unsigned STAGE_AW  = 5;
  localparam int unsigned THR_FRAC  = 12;           // Q4.12 node thresholds
  localparam int unsigned VOTE_W    = 16;           // Q4.12 leaf votes
  localparam int unsigned ACC_W     = 24;           // stage sum / stage threshold
  localparam int unsigned NF_W      = 16;           // sqrt of a 32-bit INF
  localparam int unsigned NTHR_W    = 22;           // threshold * NF >> THR_FRAC
  localparam int unsigned STAGE_ALPHA = 40;         // synthetic stage threshold, /128

  typedef logic [II_W-1:0] ii_t;
  typedef logic [II_AW-1:0] ii_addr_t;

  typedef struct packed {
    logic [4:0] x;     // left column, 0..19
    logic [4:0] y;     // top row, 0..19
    logic [4:0] w;     // width, x+w <= 20 (0 for an absent rectangle)
    logic [4:0] h;     // height, y+h <= 20
  } rect_t;

  typedef struct packed {
    rect_t               r1;      // weight -1
    rect_t               r2;      // weight 'weight'
    rect_t               r3;      // weight 2, zero-sized when absent
    logic                has_r3;
    logic [1:0]          weight;
    logic signed [15:0]  thr;     // Q4.12, scaled by NF at run time
    logic                pol;     // comparison type: invert the comparison
  } node_t;

  typedef struct packed {
    node_t               n1;      // root node
    node_t               n2;      // child node
    logic signed [VOTE_W-1:0] left;   // vote when n1 and n2 are active
    logic signed [VOTE_W-1:0] right;  // vote when n1 active, n2 not
    logic signed [VOTE_W-1:0] root;   // vote when n1 is not active
  } tree_t;

  localparam int unsigned TREE_BITS = $bits(tree_t);

  // corner values of one rectangle as read from the integral image
  typedef struct packed {
    ii_t a;   // (y,   x)
    ii_t b;   // (y,   x+w)
    ii_t c;   // (y+h, x)
    ii_t d;   // (y+h, x+w)
  } corners_t;

  // operands of one node as handed to the tree
  typedef struct packed {
    corners_t                  r1, r2, r3;
    logic [1:0]                weight;
    logic signed [NTHR_W-1:0]  thr;     // already multiplied by NF
    logic                      pol;
  } node_in_t;

  // --------------------------------------------------------------- AXI (32 bit)
  typedef struct packed {
    logic        arvalid;
    logic [31:0] araddr;
    logic [7:0]  arlen;
    logic [2:0]  arsize;
    logic [1:0]  arburst;
    logic        rready;
  } axi_rd_req_t;

  typedef struct packed {
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rlast;
  } axi_rd_rsp_t;

  typedef struct packed {
    logic        awvalid;
    logic [31:0] awaddr;
    logic [7:0]  awlen;
    logic [2:0]  awsize;
    logic [1:0]  awburst;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wlast;
    logic        bready;
  } axi_wr_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
  } axi_wr_rsp_t;

  typedef struct packed {
    logic        awvalid;
    logic [31:0] awaddr;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        bready;
    logic        arvalid;
    logic [31:0] araddr;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axil_rsp_t;

  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam int unsigned AXI_MAX_BEATS = 16;   // AXI3 burst limit of the HP ports

  // ------------------------------------------------ Evaluator register map
  localparam logic [7:0] EV_CTRL   = 8'h00;  // W: bit0 start window
  localparam logic [7:0] EV_STATUS = 8'h04;  // R: bit0 cmd_ready, bit1 result_valid, bit2 busy
  localparam logic [7:0] EV_ADDR   = 8'h08;  // RW: byte address of window top-left pixel
  localparam logic [7:0] EV_STRIDE = 8'h0C;  // RW: bytes per image row
  localparam logic [7:0] EV_TAG    = 8'h10;  // RW: tag returned with the result
  localparam logic [7:0] EV_RESULT = 8'h14;  // R: bit0 face, [12:8] exit stage; read pops
  localparam logic [7:0] EV_RTAG   = 8'h18;  // R: tag of the result
  localparam logic [7:0] EV_CYCLES = 8'h1C;  // R: cycles of the last classification

  // ----------------------------------------------- Downscaler register map
  localparam logic [7:0] DS_CTRL    = 8'h00;  // W: bit0 start
  localparam logic [7:0] DS_STATUS  = 8'h04;  // R: bit0 busy, bit1 done (sticky)
  localparam logic [7:0] DS_SRC     = 8'h08;
  localparam logic [7:0] DS_DST     = 8'h0C;
  localparam logic [7:0] DS_SRC_W   = 8'h10;
  localparam logic [7:0] DS_SRC_H   = 8'h14;
  localparam logic [7:0] DS_SRC_STR = 8'h18;
  localparam logic [7:0] DS_DST_STR = 8'h1C;
  localparam logic [7:0] DS_DST_W   = 8'h20;  // R
  localparam logic [7:0] DS_DST_H   = 8'h24;  // R

  // ------------------------------------------------ synthetic training data
  localparam int unsigned STAGE_SIZES [N_STAGES] = '{
    3, 9, 14, 19, 19, 19, 27, 39, 45, 47, 53, 67, 63, 71, 75, 78, 91, 97, 90, 121};

  function automatic logic [31:0] hash32(input logic [31:0] v);
    logic [31:0] x;
    x = v;
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic logic [31:0] rnd(input int unsigned i, input int unsigned k);
    logic [31:0] v;
    v = 32'(i) * 32'd16 + 32'(k);
    return hash32(v);
  endfunction

  function automatic rect_t mk_rect(input int unsigned x, input int unsigned y,
                                    input int unsigned w, input int unsigned h);
    rect_t r;
    r.x = 5'(x); r.y = 5'(y); r.w = 5'(w); r.h = 5'(h);
    return r;
  endfunction

  function automatic rect_t transpose(input rect_t r);
    rect_t t;
    t.x = r.y; t.y = r.x; t.w = r.h; t.h = r.w;
    return t;
  endfunction

  function automatic node_t gen_node(input int unsigned g);
    node_t n;
    logic [31:0] a, b;
    int unsigned x, y, h, u;
    a = rnd(g, 1);
    b = rnd(g, 2);
    n.has_r3 = (g % 6 == 5) && (g < 2082);
    y = int'(a[3:0]);
    h = 1 + 32'(a[31:8]) % (20 - y);
    if (n.has_r3) begin
      u = 1 + 32'(a[31:16]) % 5;
      x = 32'(b[31:16]) % (21 - 4 * u);
      n.r1 = mk_rect(x, y, 4 * u, h);
      n.r2 = mk_rect(x + u, y, u, h);
      n.r3 = mk_rect(x + 2 * u, y, u, h);
      n.weight = 2'd2;
    end else if (a[4]) begin
      u = 1 + 32'(a[31:16]) % 6;
      x = 32'(b[31:16]) % (21 - 3 * u);
      n.r1 = mk_rect(x, y, 3 * u, h);
      n.r2 = mk_rect(x + u, y, u, h);
      n.r3 = '0;
      n.weight = 2'd3;
    end else begin
      u = 1 + 32'(a[31:16]) % 10;
      x = 32'(b[31:16]) % (21 - 2 * u);
      n.r1 = mk_rect(x, y, 2 * u, h);
      n.r2 = mk_rect(x, y, u, h);
      n.r3 = '0;
      n.weight = 2'd2;
    end
    if (a[5]) begin
      n.r1 = transpose(n.r1);
      n.r2 = transpose(n.r2);
      n.r3 = transpose(n.r3);
    end
    n.thr = 16'(signed'(int'(32'(b[15:0]) % 513)) - 256);
    n.pol = a[6];
    return n;
  endfunction

  // leaf value k (0 left, 1 right, 2 root) of tree t
  function automatic logic signed [VOTE_W-1:0] gen_leaf(input int unsigned t,
                                                       input int unsigned k);
    return VOTE_W'(signed'(int'(rnd(100000 + t, k) % 8193)) - 4096);
  endfunction

  function automatic tree_t gen_tree(input int unsigned t);
    tree_t tr;
    tr.n1    = gen_node(2 * t);
    tr.n2    = gen_node(2 * t + 1);
    tr.left  = gen_leaf(t, 0);
    tr.right = gen_leaf(t, 1);
    tr.root  = gen_leaf(t, 2);
    return tr;
  endfunction

  function automatic int stage_first_tree(input int unsigned s);
    int f;
    f = 0;
    for (int unsigned k = 0; k < N_STAGES; k++)
      if (k < s) f += int'(STAGE_SIZES[k]);
    return f;
  endfunction

  function automatic logic signed [ACC_W-1:0] gen_stage_thr(input int unsigned s);
    int mn, mx, lo, hi, v;
    int first;
    first = stage_first_tree(s);
    mn = 0; mx = 0;
    for (int k = 0; k < int'(STAGE_SIZES[s]); k++) begin
      lo = int'(gen_leaf(first + k, 0)); hi = lo;
      for (int unsigned j = 1; j < 3; j++) begin
        v = int'(gen_leaf(first + k, j));
        if (v < lo) lo = v;
        if (v > hi) hi = v;
      end
      mn += lo; mx += hi;
    end
    return ACC_W'(mn + ((mx - mn) * int'(STAGE_ALPHA)) / 128);
  endfunction

endpackage
