// tb_downscaler: scales several images (widths not multiples of 4 or 6,
// rows crossing 4 KB boundaries, random bus back-pressure) and compares
// every output byte with nearest-neighbour sampling at 1.2:
//   out(x, y) = in(floor(6x/5), floor(6y/5)),  size floor(5W/6) x floor(5H/6).
// Bytes between the output width and the output stride must be left alone.
module tb_downscaler;
  import fd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  axil_req_t   axil_req;
  axil_rsp_t   axil_rsp;
  axi_rd_req_t rd_req;
  axi_rd_rsp_t rd_rsp;
  axi_wr_req_t wr_req;
  axi_wr_rsp_t wr_rsp;
  int checks = 0, failures = 0, splits = 0;

  downscaler dut (.clk, .rst_n, .s_axil_req(axil_req), .s_axil_rsp(axil_rsp),
                  .m_axi_rd_req(rd_req), .m_axi_rd_rsp(rd_rsp),
                  .m_axi_wr_req(wr_req), .m_axi_wr_rsp(wr_rsp));
  axi_mem_model #(.MEM_BYTES(131072)) u_mem (.clk, .rst_n, .rd_req, .rd_rsp, .wr_req, .wr_rsp);
  axil_bfm u_cpu (.clk, .req(axil_req), .rsp(axil_rsp));

  always @(posedge clk)
    if ((rd_req.arvalid && rd_rsp.arready && rd_req.arlen != 8'd15) ||
        (wr_req.awvalid && wr_rsp.awready && wr_req.awlen != 8'd15)) splits++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic scale(input int src, input int dst, input int w, input int h,
                       input int sstr, input int dstr);
    logic [31:0] st, v;
    int ow, oh, bad;
    ow = (w * 5) / 6; oh = (h * 5) / 6;
    for (int a = 0; a < h * sstr; a++) u_mem.mem[src + a] = 8'($urandom());
    for (int a = 0; a < oh * dstr + 8; a++) u_mem.mem[dst + a] = 8'h5A;
    u_cpu.write(32'(DS_SRC), src);
    u_cpu.write(32'(DS_DST), dst);
    u_cpu.write(32'(DS_SRC_W), w);
    u_cpu.write(32'(DS_SRC_H), h);
    u_cpu.write(32'(DS_SRC_STR), sstr);
    u_cpu.write(32'(DS_DST_STR), dstr);
    u_cpu.write(32'(DS_CTRL), 1);
    u_cpu.read(32'(DS_STATUS), st);
    check(st[0] == 1'b1, "busy after start");
    do u_cpu.read(32'(DS_STATUS), st); while (!st[1]);
    u_cpu.read(32'(DS_DST_W), v); check(int'(v) == ow, $sformatf("width %0d expected %0d", v, ow));
    u_cpu.read(32'(DS_DST_H), v); check(int'(v) == oh, $sformatf("height %0d expected %0d", v, oh));
    // one check per output row
    for (int y = 0; y < oh; y++) begin
      bad = 0;
      for (int x = 0; x < ow; x++)
        if (u_mem.mem[dst + y * dstr + x] != u_mem.mem[src + ((y * 6) / 5) * sstr + (x * 6) / 5]) bad++;
      for (int x = ow; x < dstr; x++)
        if (u_mem.mem[dst + y * dstr + x] != 8'h5A) bad++;
      check(bad == 0, $sformatf("%0dx%0d, row %0d: %0d wrong bytes", w, h, y, bad));
    end
    check(u_mem.mem[dst + oh * dstr] == 8'h5A, "wrote past the last row");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    scale(32'h0000, 32'h8000, 37, 23, 40, 32);
    scale(32'h0F80, 32'h9F00, 64, 48, 64, 56);
    scale(32'h0100, 32'hA000, 24, 24, 24, 20);
    scale(32'h2000, 32'hC000, 200, 30, 204, 168);
    scale(32'h5000, 32'h10000, 640, 12, 640, 536);
    check(splits > 0, "no short burst seen");
    check(u_mem.protocol_errors == 0, "AXI protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
