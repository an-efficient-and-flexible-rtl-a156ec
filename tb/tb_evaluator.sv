// tb_evaluator: end-to-end test of one Evaluator against the reference model.
//
// Fills a 64 KB memory with structured grey images (noise, gradients, flat
// areas with blocks), then has the CPU model classify NWIN windows at random
// positions (every byte alignment, some across a 4 KB boundary) and compares
// face / exit stage, the tag, and the classification time with the reference:
// EV_CYCLES must equal the issue cycles of the trees walked plus a fixed
// pipeline latency, i.e. one tree per cycle. Counts: faces, rejections, the
// spread of exit stages, windows loaded while another was being classified
// (double buffering) and bus protocol errors.
module tb_evaluator;
  import fd_pkg::*;
  import fd_ref_pkg::*;

  localparam int unsigned NWIN     = 40;
  localparam int unsigned STRIDE   = 256;
  localparam int unsigned LATENCY  = 4;
  localparam int unsigned MEMB     = 65536;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  axil_req_t   axil_req;
  axil_rsp_t   axil_rsp;
  axi_rd_req_t rd_req;
  axi_rd_rsp_t rd_rsp;
  axi_wr_req_t wr_req;
  axi_wr_rsp_t wr_rsp;

  evaluator dut (.clk, .rst_n, .s_axil_req(axil_req), .s_axil_rsp(axil_rsp),
                 .m_axi_rd_req(rd_req), .m_axi_rd_rsp(rd_rsp));
  axi_mem_model #(.MEM_BYTES(MEMB)) u_mem (.clk, .rst_n, .rd_req, .rd_rsp,
                                           .wr_req, .wr_rsp);
  axil_bfm u_cpu (.clk, .req(axil_req), .rsp(axil_rsp));
  assign wr_req = '0;

  int checks = 0, failures = 0;
  int n_face = 0, n_reject = 0, n_overlap = 0;
  int stage_hist [N_STAGES+1];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count windows being loaded while another is classified
  always @(posedge clk) if (dut.prep_start && dut.u_core.ev_active) n_overlap++;

  function automatic void fill_memory();
    int kind, c, a, b;
    for (int blk = 0; blk < int'(MEMB / 1024); blk++) begin
      kind = $urandom_range(0, 2);
      c = $urandom_range(0, 255); a = $urandom_range(0, 20) - 10; b = $urandom_range(0, 20) - 10;
      for (int i = 0; i < 1024; i++) begin
        int x, y;
        x = i % 32; y = i / 32;
        case (kind)
          0: u_mem.mem[blk*1024 + i] = 8'($urandom_range(0, 255));
          1: u_mem.mem[blk*1024 + i] = clamp8(c + a * x + b * y + int'($urandom_range(0, 15)));
          default: u_mem.mem[blk*1024 + i] = (((x / 5) + (y / 3)) % 3 == 0) ? 8'(c)
                                             : 8'($urandom_range(80, 180));
        endcase
      end
    end
  endfunction

  function automatic win_t get_window(input int unsigned addr);
    win_t p;
    for (int y = 0; y < int'(WIN); y++)
      for (int x = 0; x < int'(WIN); x++)
        p[y][x] = u_mem.mem[addr + y * STRIDE + x][7:1];
    return p;
  endfunction

  int unsigned exp_stage [NWIN];
  int unsigned exp_cyc   [NWIN];
  int unsigned waddr     [NWIN];
  int issued = 0, done = 0;

  task automatic collect_if_ready();
    logic [31:0] st, res, tag, cyc;
    u_cpu.read(32'(EV_STATUS), st);
    if (st[1]) begin
      u_cpu.read(32'(EV_RTAG), tag);
      u_cpu.read(32'(EV_CYCLES), cyc);
      u_cpu.read(32'(EV_RESULT), res);
      check(tag == 32'(done), $sformatf("tag %0d expected %0d", tag, done));
      check(res[12:8] == 5'(exp_stage[done]),
            $sformatf("window %0d @%h: stage %0d expected %0d", done, waddr[done], res[12:8], exp_stage[done]));
      check(res[0] == (exp_stage[done] == N_STAGES), $sformatf("window %0d face flag", done));
      check(cyc == exp_cyc[done],
            $sformatf("window %0d: %0d cycles, expected %0d", done, cyc, exp_cyc[done]));
      if (res[0]) n_face++; else n_reject++;
      stage_hist[res[12:8]]++;
      done++;
    end
  endtask

  initial begin
    logic [31:0] st;
    int lt;
    ref_init();
    fill_memory();
    foreach (stage_hist[i]) stage_hist[i] = 0;
    for (int i = 0; i < int'(NWIN); i++) begin
      if (i % 8 == 7) waddr[i] = 32'h1000 * $urandom_range(1, 14) - 2 - $urandom_range(0, 20);
      else waddr[i] = $urandom_range(0, MEMB - 24 * STRIDE);
      exp_stage[i] = classify(get_window(waddr[i]), lt);
      exp_cyc[i]   = issue_cycles(lt) + LATENCY;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (issued < int'(NWIN)) begin
      u_cpu.read(32'(EV_STATUS), st);
      if (st[0]) begin
        u_cpu.write(32'(EV_ADDR), waddr[issued]);
        u_cpu.write(32'(EV_STRIDE), STRIDE);
        u_cpu.write(32'(EV_TAG), issued);
        u_cpu.write(32'(EV_CTRL), 1);
        issued++;
      end
      collect_if_ready();
    end
    while (done < int'(NWIN)) collect_if_ready();
    check(u_mem.protocol_errors == 0, "AXI protocol errors");
    check(n_face > 0, "no window passed all stages");
    check(n_reject > 0, "no window rejected");
    check(n_overlap > 0, "no load overlapped a classification");
    $display("faces=%0d rejects=%0d overlaps=%0d read_bursts=%0d", n_face, n_reject, n_overlap, u_mem.rd_bursts);
    for (int s = 0; s <= int'(N_STAGES); s++) if (stage_hist[s] != 0) $display("  exit stage %0d: %0d", s, stage_hist[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
