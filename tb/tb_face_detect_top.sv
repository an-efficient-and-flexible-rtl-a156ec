// tb_face_detect_top: whole-system test with every parameter at its default.
//
// Plays the processor's part for one frame: a 48x40 grey image is placed in
// memory so that some of its rows straddle a 4 KB boundary; the Downscaler
// makes the next pyramid level (40x33), which is checked byte by byte against
// nearest-neighbour sampling at 1.2 (bytes beyond the output width must stay
// untouched). Then all 20x20 windows of both levels at a step of 2 pixels are
// spread over the three Evaluators, each result is compared with the
// reference cascade, and per-window cycle counts are checked for one tree per
// cycle. Mechanisms counted, each of which must occur: down-scaling, every
// Evaluator used, faces found, windows rejected early, trees read in two
// phases, window loads overlapping a classification (double buffering), and
// read bursts split at a 4 KB boundary.
module tb_face_detect_top;
  import fd_pkg::*;
  import fd_ref_pkg::*;

  localparam int unsigned NE      = 3;
  localparam int unsigned SW      = 48, SH = 40;
  localparam int unsigned SRC     = 32'h0F00;
  localparam int unsigned DST     = 32'h2000;
  localparam int unsigned SSTR    = 48, DSTR = 44;
  localparam int unsigned DW      = SW * 5 / 6, DH = SH * 5 / 6;
  localparam int unsigned STEP    = 2;
  localparam int unsigned LATENCY = 4;

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

  // one memory port per module; the evaluators' copies hold the same image
  axi_mem_model #(.MEM_BYTES(16384)) u_mem0 (.clk, .rst_n, .rd_req(rd_req[0]), .rd_rsp(rd_rsp[0]),
                                             .wr_req, .wr_rsp);
  assign no_wr = '0;
  for (genvar k = 0; k < NE; k++) begin : g_mem
    axi_mem_model #(.MEM_BYTES(16384)) u_mem (.clk, .rst_n, .rd_req(rd_req[k+1]), .rd_rsp(rd_rsp[k+1]),
                                               .wr_req(no_wr), .wr_rsp(unused_wr[k]));
  end
  axil_bfm u_cpu (.clk, .req(axil_req), .rsp(axil_rsp));

  int checks = 0, failures = 0;
  int n_face = 0, n_reject = 0, n_split = 0, n_overlap = 0, n_twophase = 0;
  int per_eval [NE];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  for (genvar k = 0; k < NE; k++) begin : g_mon
    always @(posedge clk) begin
      if (rd_req[k+1].arvalid && rd_rsp[k+1].arready && rd_req[k+1].arlen != 8'd5) n_split++;
      if (dut.g_eval[k].u_eval.prep_start && dut.g_eval[k].u_eval.u_core.ev_active) n_overlap++;
      if (dut.g_eval[k].u_eval.u_core.stall) n_twophase++;
    end
  end

  logic [7:0] src_img [SH][SW];
  logic [7:0] lvl1    [DH][DW];

  task automatic put_byte(input int unsigned a, input logic [7:0] v);
    u_mem0.mem[a] = v;
    g_mem[0].u_mem.mem[a] = v;
    g_mem[1].u_mem.mem[a] = v;
    g_mem[2].u_mem.mem[a] = v;
  endtask

  typedef struct { int unsigned addr; int unsigned stride; int stage; int cyc; } job_t;
  job_t jobs [$];
  int   busy_job [NE];

  function automatic win_t window_of(input int lvl, input int x0, input int y0);
    win_t p;
    for (int y = 0; y < int'(WIN); y++)
      for (int x = 0; x < int'(WIN); x++)
        p[y][x] = (lvl == 0) ? src_img[y0+y][x0+x][7:1] : lvl1[y0+y][x0+x][7:1];
    return p;
  endfunction

  task automatic poll_results();
    logic [31:0] st, res, cyc, tag;
    for (int k = 0; k < int'(NE); k++) begin
      u_cpu.read(32'h100 * (k + 1) + 32'(EV_STATUS), st);
      if (st[1]) begin
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_RTAG), tag);
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_CYCLES), cyc);
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_RESULT), res);
        check(int'(res[12:8]) == jobs[tag].stage,
              $sformatf("job %0d on evaluator %0d: stage %0d expected %0d", tag, k, res[12:8], jobs[tag].stage));
        check(res[0] == (jobs[tag].stage == int'(N_STAGES)), "face flag");
        check(int'(cyc) == jobs[tag].cyc, $sformatf("job %0d: %0d cycles, expected %0d", tag, cyc, jobs[tag].cyc));
        if (res[0]) n_face++; else n_reject++;
        per_eval[k]++;
        busy_job[k]--;
      end
    end
  endtask

  initial begin
    logic [31:0] st, v;
    int lt, issued, total, guard_ok;
    ref_init();
    foreach (per_eval[k]) begin per_eval[k] = 0; busy_job[k] = 0; end
    // structured source image: gradient background, noisy blocks
    for (int y = 0; y < int'(SH); y++)
      for (int x = 0; x < int'(SW); x++) begin
        if (((x / 8) + (y / 6)) % 3 == 0) src_img[y][x] = 8'($urandom_range(0, 255));
        else if (((x / 8) + (y / 6)) % 3 == 1) src_img[y][x] = clamp8(40 + 3 * x + 2 * y);
        else src_img[y][x] = ((x % 7) < 3) ? 8'd200 : 8'd30;
        put_byte(SRC + y * SSTR + x, src_img[y][x]);
      end
    for (int a = DST; a < int'(DST + DH * DSTR); a++) put_byte(a, 8'hA5);
    for (int y = 0; y < int'(DH); y++)
      for (int x = 0; x < int'(DW); x++) lvl1[y][x] = src_img[(y * 6) / 5][(x * 6) / 5];

    repeat (5) @(posedge clk);
    rst_n = 1;

    // --- pyramid level 1 by the Downscaler
    u_cpu.write(32'(DS_SRC), SRC);
    u_cpu.write(32'(DS_DST), DST);
    u_cpu.write(32'(DS_SRC_W), SW);
    u_cpu.write(32'(DS_SRC_H), SH);
    u_cpu.write(32'(DS_SRC_STR), SSTR);
    u_cpu.write(32'(DS_DST_STR), DSTR);
    u_cpu.write(32'(DS_CTRL), 1);
    do u_cpu.read(32'(DS_STATUS), st); while (!st[1]);
    u_cpu.read(32'(DS_DST_W), v); check(v == DW, "output width");
    u_cpu.read(32'(DS_DST_H), v); check(v == DH, "output height");
    guard_ok = 1;
    for (int y = 0; y < int'(DH); y++) begin
      for (int x = 0; x < int'(DW); x++)
        check(u_mem0.mem[DST + y * DSTR + x] == lvl1[y][x],
              $sformatf("downscaled pixel (%0d,%0d)", x, y));
      for (int x = DW; x < int'(DSTR); x++)
        if (u_mem0.mem[DST + y * DSTR + x] != 8'hA5) guard_ok = 0;
    end
    check(guard_ok == 1, "bytes beyond the output width were written");
    // the evaluators' memories receive the new level (the DDR is shared)
    for (int a = DST; a < int'(DST + DH * DSTR); a++) put_byte(a, u_mem0.mem[a]);

    // --- windows of both levels
    for (int lvl = 0; lvl < 2; lvl++) begin
      int w, h;
      w = (lvl == 0) ? SW : DW; h = (lvl == 0) ? SH : DH;
      for (int y0 = 0; y0 + int'(WIN) <= h; y0 += STEP)
        for (int x0 = 0; x0 + int'(WIN) <= w; x0 += STEP) begin
          job_t j;
          j.stride = (lvl == 0) ? SSTR : DSTR;
          j.addr   = ((lvl == 0) ? SRC : DST) + y0 * j.stride + x0;
          j.stage  = classify(window_of(lvl, x0, y0), lt);
          j.cyc    = issue_cycles(lt) + LATENCY;
          jobs.push_back(j);
        end
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

    check(n_face + n_reject == total, "every window answered");
    check(u_mem0.protocol_errors + g_mem[0].u_mem.protocol_errors + g_mem[1].u_mem.protocol_errors
          + g_mem[2].u_mem.protocol_errors == 0, "AXI protocol errors");
    check(n_face > 0, "mechanism: face found");
    check(n_reject > 0, "mechanism: early rejection");
    check(n_split > 0, "mechanism: burst split at 4 KB");
    check(n_overlap > 0, "mechanism: double buffering");
    check(n_twophase > 0, "mechanism: two-phase tree read");
    for (int k = 0; k < int'(NE); k++) check(per_eval[k] > 0, $sformatf("evaluator %0d unused", k));
    $display("windows=%0d faces=%0d rejects=%0d per-evaluator=%0d/%0d/%0d splits=%0d overlaps=%0d two-phase=%0d",
             total, n_face, n_reject, per_eval[0], per_eval[1], per_eval[2], n_split, n_overlap, n_twophase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
