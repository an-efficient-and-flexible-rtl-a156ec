// tb_frame_pyramid: the evaluated frame sizes, 640x480 and 320x240, run
// through the whole system at its default parameters.
//
// For each frame the processor's part is played as the system would: the
// frame is placed in memory, and the Downscaler is started again and again,
// each time on the level it made last, until a level is smaller than a 20x20
// window. This gives the full image pyramid (factor 1.2). Every byte of every
// level is checked against nearest-neighbour sampling of the level above it.
// Row strides are the widths rounded up to 4 bytes; bytes past the width must
// stay untouched. Classifying every window of a pyramid (about a million at a
// one-pixel step for 640x480) is far beyond a simulation, so a sample is
// classified on every level: the four corner windows and four at random
// positions. These are spread over the three Evaluators and checked
// against the reference cascade, with one tree per issue cycle.
// The Downscaler's cycles per pyramid are printed.
module tb_frame_pyramid;
  import fd_pkg::*;
  import fd_ref_pkg::*;

  localparam int unsigned NE        = 3;
  localparam int unsigned MEM_BYTES = 32'h0016_0000;
  localparam int unsigned LATENCY   = 4;
  localparam int unsigned N_FRAMES  = 2;
  localparam int unsigned FRAME_W [N_FRAMES] = '{640, 320};
  localparam int unsigned FRAME_H [N_FRAMES] = '{480, 240};
  localparam int unsigned FRAME_A [N_FRAMES] = '{32'h0000_0000, 32'h0010_0000};

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  axil_req_t   axil_req;
  axil_rsp_t   axil_rsp;
  axi_rd_req_t rd_req [NE+1];
  axi_rd_rsp_t rd_rsp [NE+1];
  axi_wr_req_t wr_req;
  axi_wr_rsp_t wr_rsp;
  axi_wr_req_t no_wr;
  axi_wr_rsp_t unused_wr [NE];

  face_detect_top dut (.clk, .rst_n, .s_axil_req(axil_req), .s_axil_rsp(axil_rsp),
                       .m_axi_rd_req(rd_req), .m_axi_rd_rsp(rd_rsp),
                       .m_axi_wr_req(wr_req), .m_axi_wr_rsp(wr_rsp));

  axi_mem_model #(.MEM_BYTES(MEM_BYTES)) u_mem0 (.clk, .rst_n, .rd_req(rd_req[0]), .rd_rsp(rd_rsp[0]),
                                                 .wr_req, .wr_rsp);
  assign no_wr = '0;
  for (genvar k = 0; k < NE; k++) begin : g_mem
    axi_mem_model #(.MEM_BYTES(MEM_BYTES)) u_mem (.clk, .rst_n, .rd_req(rd_req[k+1]),
                                                  .rd_rsp(rd_rsp[k+1]),
                                                  .wr_req(no_wr), .wr_rsp(unused_wr[k]));
  end
  axil_bfm u_cpu (.clk, .req(axil_req), .rsp(axil_rsp));

  int checks = 0, failures = 0;
  int n_face = 0, n_reject = 0, n_levels = 0;
  int per_eval [NE];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_byte(input int unsigned a, input logic [7:0] v);
    u_mem0.mem[a] = v;
    g_mem[0].u_mem.mem[a] = v;
    g_mem[1].u_mem.mem[a] = v;
    g_mem[2].u_mem.mem[a] = v;
  endtask

  typedef struct { int unsigned addr; int unsigned stride; int stage; int cyc; } job_t;
  job_t jobs [$];
  int   busy_job [NE];

  function automatic win_t window_at(input int unsigned a, input int unsigned stride);
    win_t p;
    for (int y = 0; y < int'(WIN); y++)
      for (int x = 0; x < int'(WIN); x++)
        p[y][x] = u_mem0.mem[a + y * stride + x][7:1];
    return p;
  endfunction

  task automatic add_job(input int unsigned a, input int unsigned stride);
    job_t j;
    int lt;
    j.addr   = a;
    j.stride = stride;
    j.stage  = classify(window_at(a, stride), lt);
    j.cyc    = issue_cycles(lt) + LATENCY;
    jobs.push_back(j);
  endtask

  task automatic poll_results();
    logic [31:0] st, res, cyc, tag;
    for (int k = 0; k < int'(NE); k++) begin
      u_cpu.read(32'h100 * (k + 1) + 32'(EV_STATUS), st);
      if (st[1]) begin
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_RTAG), tag);
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_CYCLES), cyc);
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_RESULT), res);
        check(int'(res[12:8]) == jobs[tag].stage,
              $sformatf("job %0d: stage %0d expected %0d", tag, res[12:8], jobs[tag].stage));
        check(res[0] == (jobs[tag].stage == int'(N_STAGES)), "face flag");
        check(int'(cyc) == jobs[tag].cyc, $sformatf("job %0d: %0d cycles, expected %0d", tag, cyc, jobs[tag].cyc));
        if (res[0]) n_face++; else n_reject++;
        per_eval[k]++;
        busy_job[k]--;
      end
    end
  endtask

  // one Downscaler pass; checks the new level against the one it came from
  task automatic downscale(input int unsigned src, input int unsigned sw, input int unsigned sh,
                           input int unsigned sstr, input int unsigned dst, input int unsigned dstr,
                           output int unsigned dw, output int unsigned dh);
    logic [31:0] st, v;
    int guard_ok, pix_ok;
    dw = sw * 5 / 6;
    dh = sh * 5 / 6;
    for (int unsigned a = dst; a < dst + dh * dstr; a++) put_byte(a, 8'hA5);
    u_cpu.write(32'(DS_SRC), src);
    u_cpu.write(32'(DS_DST), dst);
    u_cpu.write(32'(DS_SRC_W), sw);
    u_cpu.write(32'(DS_SRC_H), sh);
    u_cpu.write(32'(DS_SRC_STR), sstr);
    u_cpu.write(32'(DS_DST_STR), dstr);
    u_cpu.write(32'(DS_CTRL), 1);
    do u_cpu.read(32'(DS_STATUS), st); while (!st[1]);
    u_cpu.read(32'(DS_DST_W), v); check(v == dw, $sformatf("output width %0d, expected %0d", v, dw));
    u_cpu.read(32'(DS_DST_H), v); check(v == dh, $sformatf("output height %0d, expected %0d", v, dh));
    guard_ok = 1;
    pix_ok = 1;
    for (int unsigned y = 0; y < dh; y++) begin
      for (int unsigned x = 0; x < dw; x++)
        if (u_mem0.mem[dst + y * dstr + x] != u_mem0.mem[src + ((y * 6) / 5) * sstr + (x * 6) / 5])
          pix_ok = 0;
      for (int unsigned x = dw; x < dstr; x++)
        if (u_mem0.mem[dst + y * dstr + x] != 8'hA5) guard_ok = 0;
    end
    check(pix_ok == 1, $sformatf("level %0dx%0d: a pixel differs from nearest-neighbour sampling", dw, dh));
    check(guard_ok == 1, $sformatf("level %0dx%0d: bytes beyond the width were written", dw, dh));
    // the evaluators see the same shared memory
    for (int unsigned a = dst; a < dst + dh * dstr; a++) put_byte(a, u_mem0.mem[a]);
  endtask

  initial begin
    logic [31:0] st;
    int unsigned issued, total;
    longint t0;
    ref_init();
    foreach (per_eval[k]) begin per_eval[k] = 0; busy_job[k] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;

    for (int f = 0; f < int'(N_FRAMES); f++) begin
      int unsigned w, h, a, str, nw, nh, na, nstr;
      w = FRAME_W[f]; h = FRAME_H[f]; a = FRAME_A[f]; str = w;
      // frame: noisy blocks, gradients and bars
      for (int unsigned y = 0; y < h; y++)
        for (int unsigned x = 0; x < w; x++) begin
          logic [7:0] p;
          case (((x / 24) + (y / 18)) % 3)
            0:       p = 8'($urandom_range(0, 255));
            1:       p = clamp8(int'(x % 97) + 2 * int'(y % 61));
            default: p = ((x % 9) < 4) ? 8'd210 : 8'd25;
          endcase
          put_byte(a + y * str + x, p);
        end
      t0 = $time;
      while (1) begin
        // windows of this level
        for (int s = 0; s < 8; s++) begin
          int unsigned x0, y0;
          case (s)
            0: begin x0 = 0;      y0 = 0;      end
            1: begin x0 = w - 20; y0 = 0;      end
            2: begin x0 = 0;      y0 = h - 20; end
            3: begin x0 = w - 20; y0 = h - 20; end
            default: begin x0 = $urandom_range(0, w - 20); y0 = $urandom_range(0, h - 20); end
          endcase
          add_job(a + y0 * str + x0, str);
        end
        n_levels++;
        if (w * 5 / 6 < WIN || h * 5 / 6 < WIN) break;
        na   = a + h * str;
        nstr = ((w * 5 / 6) + 3) / 4 * 4;
        downscale(a, w, h, str, na, nstr, nw, nh);
        a = na; w = nw; h = nh; str = nstr;
      end
      $display("frame %0dx%0d: %0d levels down to %0dx%0d, %0d cycles of down-scaling and checking",
               FRAME_W[f], FRAME_H[f], n_levels, w, h, ($time - t0) / 10);
      n_levels = 0;
    end

    total = jobs.size();
    issued = 0;
    while (issued < total) begin
      for (int k = 0; k < int'(NE) && issued < total; k++) begin
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_STATUS), st);
        if (st[0]) begin
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_ADDR), jobs[issued].addr);
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_STRIDE), jobs[issued].stride);
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_TAG), issued);
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_CTRL), 1);
          busy_job[k]++;
          issued++;
        end
      end
      poll_results();
    end
    while (busy_job[0] + busy_job[1] + busy_job[2] > 0) poll_results();

    check(n_face + n_reject == int'(total), "every window answered");
    check(u_mem0.protocol_errors + g_mem[0].u_mem.protocol_errors + g_mem[1].u_mem.protocol_errors
          + g_mem[2].u_mem.protocol_errors == 0, "AXI protocol errors");
    for (int k = 0; k < int'(NE); k++) check(per_eval[k] > 0, $sformatf("evaluator %0d unused", k));
    $display("windows=%0d faces=%0d rejects=%0d per-evaluator=%0d/%0d/%0d",
             total, n_face, n_reject, per_eval[0], per_eval[1], per_eval[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
