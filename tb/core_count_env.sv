// core_count_env: one complete system with N_EVAL = NE Evaluators, its
// memories and processor driver, and the test that tb_core_count runs on it.
// The image comes in through img; checks, failures and done go out to the
// testbench. On reset release each Evaluator's memory receives the image.
// The test classifies NWIN windows on whichever core is free and checks the
// stage, face flag and cycle count of each against the reference cascade. It
// also checks that every core took part, that the first unused Evaluator
// address is decoded to the last core, and that no AXI protocol errors
// occurred.
module core_count_env
  import fd_pkg::*;
  import fd_ref_pkg::*;
#(
  parameter int unsigned NE   = 1,
  parameter int unsigned NWIN = 30,
  parameter int unsigned IW   = 64,
  parameter int unsigned IH   = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] img [IH][IW],
  output int         checks,
  output int         failures,
  output bit         done
);
  localparam int unsigned LATENCY = 4;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic win_t window_at(input int x0, input int y0);
    win_t p;
    for (int y = 0; y < int'(WIN); y++)
      for (int x = 0; x < int'(WIN); x++) p[y][x] = img[y0+y][x0+x][7:1];
    return p;
  endfunction

  initial begin checks = 0; failures = 0; end

  axil_req_t   axil_req;
  axil_rsp_t   axil_rsp;
  axi_rd_req_t rd_req [NE+1];
  axi_rd_rsp_t rd_rsp [NE+1];
  axi_wr_req_t wr_req, no_wr;
  axi_wr_rsp_t wr_rsp;
  axi_wr_rsp_t unused_wr [NE];

  face_detect_top #(.N_EVAL(NE)) dut (.clk, .rst_n, .s_axil_req(axil_req), .s_axil_rsp(axil_rsp),
                                      .m_axi_rd_req(rd_req), .m_axi_rd_rsp(rd_rsp),
                                      .m_axi_wr_req(wr_req), .m_axi_wr_rsp(wr_rsp));
  axi_mem_model #(.MEM_BYTES(4096)) u_mem0 (.clk, .rst_n, .rd_req(rd_req[0]), .rd_rsp(rd_rsp[0]),
                                            .wr_req, .wr_rsp);
  assign no_wr = '0;
  bit perr = 0;
  for (genvar k = 0; k < NE; k++) begin : g_mem
    axi_mem_model #(.MEM_BYTES(4096)) u_mem (.clk, .rst_n, .rd_req(rd_req[k+1]), .rd_rsp(rd_rsp[k+1]),
                                             .wr_req(no_wr), .wr_rsp(unused_wr[k]));
    initial begin
      wait (rst_n);
      for (int y = 0; y < int'(IH); y++)
        for (int x = 0; x < int'(IW); x++) u_mem.mem[y * IW + x] = img[y][x];
    end
    always @(posedge clk) if (u_mem.protocol_errors != 0) perr = 1;
  end
  axil_bfm u_cpu (.clk, .req(axil_req), .rsp(axil_rsp));

  int exp_stage [NWIN], exp_cyc [NWIN], used [NE], busy [NE];
  int n_face = 0, n_reject = 0;

  task automatic poll();
    logic [31:0] st, res, cyc, tag;
    for (int k = 0; k < int'(NE); k++) begin
      u_cpu.read(32'h100 * (k + 1) + 32'(EV_STATUS), st);
      if (st[1]) begin
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_RTAG), tag);
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_CYCLES), cyc);
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_RESULT), res);
        check(int'(res[12:8]) == exp_stage[tag],
              $sformatf("%0d cores, window %0d: stage %0d expected %0d", NE, tag, res[12:8], exp_stage[tag]));
        check(int'(cyc) == exp_cyc[tag],
              $sformatf("%0d cores, window %0d: %0d cycles expected %0d", NE, tag, cyc, exp_cyc[tag]));
        if (res[0]) n_face++; else n_reject++;
        used[k]++;
        busy[k]--;
      end
    end
  endtask

  initial begin
    logic [31:0] st, st_last;
    int issued, lt, x0 [NWIN], y0 [NWIN], nbusy;
    done = 0;
    foreach (used[k]) begin used[k] = 0; busy[k] = 0; end
    wait (rst_n);
    for (int i = 0; i < int'(NWIN); i++) begin
      x0[i] = (i * 7) % int'(IW - WIN + 1);
      y0[i] = (i * 5) % int'(IH - WIN + 1);
      exp_stage[i] = classify(window_at(x0[i], y0[i]), lt);
      exp_cyc[i]   = issue_cycles(lt) + LATENCY;
    end
    // an address beyond the last Evaluator reaches the last one, nothing else
    u_cpu.read(32'h100 * (NE + 1) + 32'(EV_STATUS), st);
    u_cpu.read(32'h100 * NE + 32'(EV_STATUS), st_last);
    check(st == st_last, $sformatf("%0d cores: unused slot decoded", NE));
    issued = 0;
    while (issued < int'(NWIN)) begin
      for (int k = 0; k < int'(NE) && issued < int'(NWIN); k++) begin
        u_cpu.read(32'h100 * (k + 1) + 32'(EV_STATUS), st);
        if (st[0]) begin
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_ADDR), y0[issued] * IW + x0[issued]);
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_STRIDE), IW);
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_TAG), issued);
          u_cpu.write(32'h100 * (k + 1) + 32'(EV_CTRL), 1);
          busy[k]++;
          issued++;
        end
      end
      poll();
    end
    do begin
      poll();
      nbusy = 0;
      foreach (busy[k]) nbusy += busy[k];
    end while (nbusy > 0);
    check(n_face + n_reject == int'(NWIN), $sformatf("%0d cores: every window answered", NE));
    for (int k = 0; k < int'(NE); k++)
      check(used[k] > 0, $sformatf("%0d cores: core %0d unused", NE, k));
    check(!perr, "AXI protocol errors");
    $display("%0d core(s): faces=%0d rejects=%0d", NE, n_face, n_reject);
    done = 1;
  end

endmodule
